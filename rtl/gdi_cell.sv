// gdi_cell: logic model of the Gate-Diffusion-Input (GDI) basic cell.
//
// The cell is one PMOS and one NMOS whose gates are tied together (G) and
// whose drains form the output D. The PMOS source is the input P, the NMOS
// source the input N, and each bulk is tied to its own source. With G high
// the NMOS conducts and D follows N; with G low the PMOS conducts and D
// follows P. Choosing what drives P, N and G gives, in two transistors:
//   N=0  P=B  G=A : A'B         N=B  P=1  G=A : A'+B
//   N=1  P=B  G=A : A+B         N=B  P=0  G=A : AB
//   N=C  P=B  G=A : A'B+AC      N=0  P=1  G=A : A'
// Only this switching function is modelled. The real cell passes a weak
// level (a threshold drop) for some input patterns and needs a twin-well or
// SOI process for the bulk ties; neither is visible at logic level.
//
// Interface: g, p, n in, d out. Purely combinational, no timing.
module gdi_cell (
  input  logic g,   // common gate of both transistors
  input  logic p,   // PMOS diffusion input, passed when g = 0
  input  logic n,   // NMOS diffusion input, passed when g = 1
  output logic d    // common diffusion output
);

  assign d = g ? n : p;

endmodule
