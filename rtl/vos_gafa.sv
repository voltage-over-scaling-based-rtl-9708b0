// vos_gafa -- 1-bit approximate full adder built from GDI cells.
//
// The adder drops the carry logic altogether: the carry output is simply the
// B input, and the sum is an XOR-based function of A, B and CIN:
//
//     SUM  = (A ^ B) & CIN | (~A ^ B) & ~CIN      (= ~(A ^ B ^ CIN))
//     COUT = B
//
// For CIN = 1 the sum is A XOR B, for CIN = 0 it is A XNOR B. Over the eight
// input patterns the sum is therefore the complement of the exact full-adder
// sum, and COUT differs from the exact majority carry for two patterns
// ({CIN,A,B} = 3'b001 and 3'b110).
//
// Both equations are the cell's published behaviour. The cell structure is
// this design's own: four GDI cells (two-transistor gates, see gdi_cell)
//   u_nb   : NOT   B                         -> nb
//   u_xnor : MUX   G=A, P=nb, N=B            -> A XNOR B
//   u_xor  : NOT   (A XNOR B)                -> A XOR B
//   u_sum  : MUX   G=CIN, P=xnor, N=xor      -> SUM
// The transistor-level cell this models has 14 transistors; its extra pairs
// restore signal levels and buffer CIN, which changes nothing in the logic.
//
// Interface: a, b, cin in; sum, cout out. Combinational, zero cycles. The
// transistor-level cell has no COUT pin: its carry is the B wire itself,
// which the cout port here makes explicit so that a chain can use it.
module vos_gafa (
    input  logic a,
    input  logic b,
    input  logic cin,
    output logic sum,
    output logic cout
);

  logic nb;       // ~B
  logic xnor_ab;  // A XNOR B
  logic xor_ab;   // A XOR B

  gdi_cell u_nb   (.g(b),       .p(1'b1),    .n(1'b0),   .out(nb));
  gdi_cell u_xnor (.g(a),       .p(nb),      .n(b),      .out(xnor_ab));
  gdi_cell u_xor  (.g(xnor_ab), .p(1'b1),    .n(1'b0),   .out(xor_ab));
  gdi_cell u_sum  (.g(cin),     .p(xnor_ab), .n(xor_ab), .out(sum));

  // Carry logic eliminated: the carry out is the B operand bit.
  assign cout = b;

endmodule
