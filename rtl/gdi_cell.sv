// gdi_cell -- logic view of one Gate Diffusion Input (GDI) cell.
//
// A GDI cell is a single PMOS/NMOS pair that looks like a CMOS inverter,
// except that the PMOS source (P) and the NMOS source (N) are inputs instead
// of being tied to the rails. Both gates share input G and both drains form
// OUT. When G is low the PMOS conducts and OUT follows P; when G is high the
// NMOS conducts and OUT follows N:
//
//     OUT = ~G & P | G & N
//
// Tying P and N to constants or to other signals gives the whole family of
// GDI functions: N=0,P=B -> ~A&B (F1); N=B,P=1 -> ~A|B (F2); N=1,P=B -> A|B;
// N=B,P=0 -> A&B; N=C,P=B -> 2:1 multiplexer; N=0,P=1 -> ~A.
//
// Interface: g, p, n in; out. Purely combinational, no clock, zero cycles.
// The function and the pin roles are the standard GDI cell. Only the logic
// value is modelled: the threshold drop that a real cell shows on some input
// patterns, and any full-swing restoration, are electrical and are outside
// this model (every output here is a full logic level).
module gdi_cell (
    input  logic g,   // shared gate of the PMOS and NMOS
    input  logic p,   // PMOS source: passed to out when g = 0
    input  logic n,   // NMOS source: passed to out when g = 1
    output logic out  // shared drain
);

  always_comb begin
    if (g) out = n;
    else   out = p;
  end

endmodule
