// toffoli_gate: 3x3 reversible Toffoli gate, P = A, Q = B, R = AB xor C.
//
// The gate is its own inverse: applying it twice returns the inputs. In the
// partial product array C is tied to 0, so R is the product bit A.B and P and
// Q hand A and B on to the next gate unchanged.
//
// R is made from three GDI cells: an AND (G=A, N=B, P=0), an inverter of the
// AND (G=AB, N=0, P=1), and a select on C that passes AB when C=0 and its
// inverse when C=1. This cell mapping is this design's own; the gate function
// is the standard Toffoli function.
//
// Interface: a, b, c in; p, q, r out. Purely combinational.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,   // = a
  output logic q,   // = b
  output logic r    // = (a & b) ^ c
);

  logic ab, ab_n;

  gdi_cell u_and (.g(a),  .p(1'b0), .n(b),    .d(ab));
  gdi_cell u_inv (.g(ab), .p(1'b1), .n(1'b0), .d(ab_n));
  gdi_cell u_sel (.g(c),  .p(ab),   .n(ab_n), .d(r));

  assign p = a;
  assign q = b;

endmodule
