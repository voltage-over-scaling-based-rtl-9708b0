// tb_vos_rca_params -- checks the adder at widths and first carry-ins other
// than the 8-bit default.
//
// Three instances: 4 bits with the first carry-in tied to 1 (all 256 operand
// pairs), 16 bits with carry-in 0 (4,000 random pairs) and 1 bit with
// carry-in 1 (all 4 pairs). Each result is compared with a bit-serial model
// of the chain: s[i] = ~(a[i] ^ b[i] ^ c), then c = b[i], starting from the
// instance's CIN0. Combinational; sampled 1 ns after each change. A watchdog
// ends a hung run.
module tb_vos_rca_params;

  logic [3:0]  a4, b4, s4;
  logic [15:0] a16, b16, s16;
  logic        a1, b1, s1;
  int checks = 0;
  int failures = 0;

  vos_rca #(.WIDTH(4),  .CIN0(1'b1)) dut4  (.a(a4),  .b(b4),  .s(s4));
  vos_rca #(.WIDTH(16), .CIN0(1'b0)) dut16 (.a(a16), .b(b16), .s(s16));
  vos_rca #(.WIDTH(1),  .CIN0(1'b1)) dut1  (.a(a1),  .b(b1),  .s(s1));

  // Model on up to 32 bits; bits at and above w are returned as 0.
  function automatic logic [31:0] model(input logic [31:0] x, input logic [31:0] y,
                                        input int w, input logic cin0);
    logic c;
    logic [31:0] r;
    r = '0;
    c = cin0;
    for (int i = 0; i < w; i++) begin
      r[i] = ~(x[i] ^ y[i] ^ c);
      c = y[i];
    end
    return r;
  endfunction

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a16 = '0; b16 = '0; a1 = 1'b0; b1 = 1'b0;
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      #1ns;
      check(32'(s4), model(32'(a4), 32'(b4), 4, 1'b1), "width 4");
    end
    for (int t = 0; t < 4000; t++) begin
      a16 = 16'($urandom);
      b16 = 16'($urandom);
      #1ns;
      check(32'(s16), model(32'(a16), 32'(b16), 16, 1'b0), "width 16");
    end
    for (int v = 0; v < 4; v++) begin
      {a1, b1} = 2'(v);
      #1ns;
      check(32'(s1), model(32'(a1), 32'(b1), 1, 1'b1), "width 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
