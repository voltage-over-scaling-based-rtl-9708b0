// tb_vos_rca -- end-to-end, full-size test of the 8-bit approximate adder.
//
// Runs the adder at its default parameters (8 bits, first carry-in 0) over
// all 65,536 operand pairs. The expected sum is worked out bit by bit with a
// software model of the chain (carry into stage i = carry out of stage i-1 =
// b[i-1]; s[i] = ~(a[i]^b[i]^carry)) and also compared with the closed form
// ~(a ^ b ^ (b << 1)).
//
// Mechanisms counted, each of which must occur at least once:
//   * a 1 carried into a stage, a 0 carried into a stage,
//   * a result that differs from the exact a + b (the approximation),
//   * one-stage ripple: flipping b[i] changes exactly s[i] and s[i+1]
//     (s[i] alone for the top bit), flipping a[i] changes exactly s[i].
// Error statistics against the exact 8-bit sum are printed. The adder is
// combinational; every result is sampled 1 ns after the operands change,
// i.e. with zero cycles of latency. A watchdog ends a hung run.
module tb_vos_rca;

  localparam int W = 8;

  logic [W-1:0] a, b, s;
  int checks = 0;
  int failures = 0;

  // mechanism counters
  int n_carry1 = 0, n_carry0 = 0, n_approx = 0, n_exact = 0;
  int n_ripple_b = 0, n_ripple_a = 0;
  longint sum_ed = 0;  // summed |approx - exact| over all pairs
  int max_ed = 0;

  vos_rca dut (.a(a), .b(b), .s(s));

  function automatic logic [W-1:0] model(input logic [W-1:0] x, input logic [W-1:0] y);
    logic c;
    logic [W-1:0] r;
    c = 1'b0;
    for (int i = 0; i < W; i++) begin
      r[i] = ~(x[i] ^ y[i] ^ c);
      c = y[i];
    end
    return r;
  endfunction

  initial begin : watchdog
    #2ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < (1 << W); x++) begin
      for (int y = 0; y < (1 << W); y++) begin
        logic [W-1:0] exp_s, exact;
        int ed;
        a = W'(x);
        b = W'(y);
        #1ns;
        exp_s = model(a, b);
        checks++;
        if (s !== exp_s) begin
          failures++;
          if (failures < 10) $display("FAIL a=%h b=%h s=%h expected=%h", a, b, s, exp_s);
        end
        checks++;
        if (s !== ~(a ^ b ^ {b[W-2:0], 1'b0})) begin
          failures++;
          if (failures < 10) $display("FAIL closed form a=%h b=%h s=%h", a, b, s);
        end
        for (int i = 1; i < W; i++) begin
          if (b[i-1]) n_carry1++;
          else        n_carry0++;
        end
        exact = a + b;
        if (s != exact) n_approx++;
        else            n_exact++;
        ed = (int'(s) > int'(exact)) ? int'(s) - int'(exact) : int'(exact) - int'(s);
        sum_ed += longint'(ed);
        if (ed > max_ed) max_ed = ed;
      end
    end

    // One-stage ripple: effect of flipping single operand bits.
    for (int t = 0; t < 200; t++) begin
      logic [W-1:0] s0, a0, b0, exp_mask;
      int i;
      a0 = W'($urandom);
      b0 = W'($urandom);
      i = int'($urandom_range(W - 1, 0));
      a = a0; b = b0; #1ns; s0 = s;
      b = b0 ^ (W'(1) << i); #1ns;
      exp_mask = W'(3 << i);
      checks++;
      if ((s ^ s0) !== exp_mask) begin
        failures++;
        $display("FAIL ripple via b[%0d]: changed bits %b expected %b", i, s ^ s0, exp_mask);
      end else n_ripple_b++;
      a = a0 ^ (W'(1) << i); b = b0; #1ns;
      checks++;
      if ((s ^ s0) !== (W'(1) << i)) begin
        failures++;
        $display("FAIL a[%0d] reaches bits %b", i, s ^ s0);
      end else n_ripple_a++;
    end

    checks++;
    if (n_carry1 == 0 || n_carry0 == 0 || n_approx == 0 || n_ripple_b == 0 || n_ripple_a == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("mechanisms: carry1=%0d carry0=%0d approx=%0d exact=%0d ripple_b=%0d ripple_a=%0d",
             n_carry1, n_carry0, n_approx, n_exact, n_ripple_b, n_ripple_a);
    $display("error vs exact 8-bit sum: rate %0d/65536, mean error distance %0.3f, max %0d",
             n_approx, real'(sum_ed) / 65536.0, max_ed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
