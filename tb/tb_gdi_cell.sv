// tb_gdi_cell -- self-checking test of the GDI cell.
//
// Applies all eight (g, p, n) patterns and compares out with the cell
// equation ~g&p | g&n, then ties p and n as in the standard GDI function
// table and checks each derived function (F1, F2, OR, AND, MUX, NOT) against
// an independently written truth table. The cell is combinational, so each
// result is sampled 1 ns after the inputs change. A watchdog ends the run if
// it hangs.
module tb_gdi_cell;

  logic g, p, n, out;
  int checks = 0;
  int failures = 0;

  gdi_cell dut (.g(g), .p(p), .n(n), .out(out));

  task automatic check(input logic exp, input string what);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL %s: g=%b p=%b n=%b out=%b expected=%b", what, g, p, n, out, exp);
    end
  endtask

  // Truth tables, bit index {A,B} = 2*A + B (A drives g).
  localparam logic [3:0] TT_F1  = 4'b0010;  // ~A & B
  localparam logic [3:0] TT_F2  = 4'b1011;  // ~A | B
  localparam logic [3:0] TT_OR  = 4'b1110;  // A | B
  localparam logic [3:0] TT_AND = 4'b1000;  // A & B

  initial begin : watchdog
    #10us;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Cell equation, exhaustive.
    for (int v = 0; v < 8; v++) begin
      {g, p, n} = 3'(v);
      #1ns;
      check((~g & p) | (g & n), "equation");
    end
    // Derived functions, A on g and B (and C) on p/n.
    for (int v = 0; v < 4; v++) begin
      logic A, B;
      {A, B} = 2'(v);
      g = A; n = 1'b0; p = B;  #1ns; check(TT_F1[v],  "F1");
      g = A; n = B;    p = 1'b1; #1ns; check(TT_F2[v],  "F2");
      g = A; n = 1'b1; p = B;  #1ns; check(TT_OR[v],  "OR");
      g = A; n = B;    p = 1'b0; #1ns; check(TT_AND[v], "AND");
      g = A; n = 1'b0; p = 1'b1; #1ns; check(!A,        "NOT");
    end
    for (int v = 0; v < 8; v++) begin
      logic A, B, C;
      {A, B, C} = 3'(v);
      g = A; p = B; n = C; #1ns;
      check(A ? C : B, "MUX");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
