// gps_gate: the 4x4 reversible GPS gate.
//
//   P = B xor C
//   Q = AB' + (A xnor B)C
//   R = A xor B xor C xor D
//   S = AB + BC + CA
//
// All sixteen input patterns give different outputs, so the gate is
// reversible. With D tied to 0 it is a full adder: R is the sum of A, B and
// C, S is their carry (majority), and P and Q are garbage outputs.
//
// Both S and Q are selects on A xor B: when A and B differ, S = C and Q = A;
// when they agree, S = A and Q = C. The gate is built from GDI cells on that
// basis: inverters, XORs as selects of a signal and its inverse, and the two
// selects for S and Q. The equations are the proposed design's (Q as drawn in
// its gate symbol); the split into cells is this design's own.
//
// Interface: a, b, c, d in; p, q, r, s out. Purely combinational.
module gps_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,   // B xor C
  output logic q,   // AB' + (A xnor B)C
  output logic r,   // A xor B xor C xor D (sum when d = 0)
  output logic s    // AB + BC + CA        (carry)
);

  logic b_n, c_n, d_n;
  logic ab_x, cd_x, cd_x_n;

  gdi_cell u_binv  (.g(b),    .p(1'b1), .n(1'b0),   .d(b_n));
  gdi_cell u_cinv  (.g(c),    .p(1'b1), .n(1'b0),   .d(c_n));
  gdi_cell u_dinv  (.g(d),    .p(1'b1), .n(1'b0),   .d(d_n));

  gdi_cell u_bc    (.g(b),    .p(c),    .n(c_n),    .d(p));      // B xor C
  gdi_cell u_ab    (.g(a),    .p(b),    .n(b_n),    .d(ab_x));   // A xor B
  gdi_cell u_cd    (.g(c),    .p(d),    .n(d_n),    .d(cd_x));   // C xor D
  gdi_cell u_cdinv (.g(cd_x), .p(1'b1), .n(1'b0),   .d(cd_x_n));
  gdi_cell u_sum   (.g(ab_x), .p(cd_x), .n(cd_x_n), .d(r));      // (A^B)^(C^D)

  gdi_cell u_maj   (.g(ab_x), .p(a),    .n(c),      .d(s));
  gdi_cell u_q     (.g(ab_x), .p(c),    .n(a),      .d(q));

endmodule
