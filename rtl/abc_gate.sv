// abc_gate: the 3x3 reversible ABC gate.
//
//   P = A
//   Q = A xor B
//   R = A'C + B'C + ABC'   (which equals AB xor C)
//
// The eight input patterns map to eight different output patterns, so the
// gate is reversible. With C tied to 0 it is a half adder: Q is the sum of A
// and B, R their carry, and P is a garbage output.
//
// The outputs are built from GDI cells: B' (G=B, N=0, P=1); Q as a select of
// B' and B on A; AB as an AND cell; (AB)' as an inverter cell; and R as a
// select of AB and (AB)' on C. The gate's equations are the proposed design's;
// this split into cells is this design's own.
//
// Interface: a, b, c in; p, q, r out. Purely combinational.
module abc_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,   // A
  output logic q,   // A xor B         (sum when c = 0)
  output logic r    // A'C + B'C + ABC' (carry when c = 0)
);

  logic b_n, ab, ab_n;

  gdi_cell u_binv (.g(b),  .p(1'b1), .n(1'b0), .d(b_n));
  gdi_cell u_xor  (.g(a),  .p(b),    .n(b_n),  .d(q));
  gdi_cell u_and  (.g(a),  .p(1'b0), .n(b),    .d(ab));
  gdi_cell u_ninv (.g(ab), .p(1'b1), .n(1'b0), .d(ab_n));
  gdi_cell u_rsel (.g(c),  .p(ab),   .n(ab_n), .d(r));

  assign p = a;

endmodule
