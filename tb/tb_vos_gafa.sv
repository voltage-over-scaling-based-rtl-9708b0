// tb_vos_gafa -- self-checking test of the 1-bit approximate full adder.
//
// Sweeps all eight {cin, a, b} patterns, the same sweep as the cell's
// transient characterisation, and checks:
//   * sum against a literal truth table (8'h69, bit i = pattern {cin,a,b}),
//   * sum against the published equation (A^B)CIN + (~A^B)~CIN,
//   * cout against B.
// It also counts how often sum and cout differ from an exact full adder and
// checks those counts (8 of 8 sums, 2 of 8 carries). Combinational: outputs
// are sampled 1 ns after each input change. A watchdog ends a hung run.
module tb_vos_gafa;

  logic a, b, cin, sum, cout;
  int checks = 0;
  int failures = 0;
  int sum_err = 0;
  int cout_err = 0;

  localparam logic [7:0] SUM_TT = 8'h69;  // index {cin,a,b}

  vos_gafa dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: cin=%b a=%b b=%b got=%b expected=%b", what, cin, a, b, got, exp);
    end
  endtask

  initial begin : watchdog
    #10us;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {cin, a, b} = 3'(i);
      #1ns;
      check(sum, SUM_TT[i], "sum table");
      check(sum, ((a ^ b) & cin) | ((~a ^ b) & ~cin), "sum equation");
      check(cout, b, "cout");
      if (sum != (a ^ b ^ cin)) sum_err++;
      if (cout != ((a & b) | (a & cin) | (b & cin))) cout_err++;
    end
    checks++;
    if (sum_err != 8 || cout_err != 2) begin
      failures++;
      $display("FAIL error counts: sum %0d (expected 8), cout %0d (expected 2)", sum_err, cout_err);
    end
    $display("vos_gafa: sum differs from exact in %0d/8 rows, carry in %0d/8 rows", sum_err, cout_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
