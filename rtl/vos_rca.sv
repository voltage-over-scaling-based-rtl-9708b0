// vos_rca -- WIDTH-bit approximate ripple-carry adder (default 8 bits).
//
// WIDTH vos_gafa cells are chained: stage i adds a[i] and b[i] with the carry
// output of stage i-1 and drives s[i]. Because each cell's carry output is
// its B input, the carry into stage i is b[i-1], and the whole adder reduces
// to
//
//     s[i] = ~(a[i] ^ b[i] ^ b[i-1])      for i >= 1
//     s[0] = ~(a[0] ^ b[0] ^ CIN0)
//
// The "ripple" is thus one cell deep: no carry travels further than one
// stage, which is where the adder's speed and power savings come from.
//
// Interface: a, b in (WIDTH bits each); s out (WIDTH bits). The adder has no
// carry-in or carry-out pin, matching the published 8-bit block (A0..A7,
// B0..B7, S0..S7 plus supplies). The carry into the first stage is the
// parameter CIN0, a constant; its value is this design's choice (0, i.e. the
// first stage's CIN tied to ground). The carry leaving the last stage is not
// used (carry[WIDTH] stays unloaded on purpose).
// Combinational, zero cycles of latency.
module vos_rca #(
    parameter int unsigned WIDTH = 8,     // operand width (8 in the reference design)
    parameter bit          CIN0  = 1'b0   // constant carry into stage 0
) (
    input  logic [WIDTH-1:0] a,
    input  logic [WIDTH-1:0] b,
    output logic [WIDTH-1:0] s
);

  logic [WIDTH:0] carry;  // carry[i] enters stage i

  assign carry[0] = CIN0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    vos_gafa u_fa (
        .a   (a[i]),
        .b   (b[i]),
        .cin (carry[i]),
        .sum (s[i]),
        .cout(carry[i+1])
    );
  end

endmodule
