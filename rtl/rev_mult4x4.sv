// rev_mult4x4: 4-bit by 4-bit reversible multiplier, prod = x * y.
//
// Two stages. The partial product generator (ppg), 16 Toffoli gates each
// with one constant 0 input, forms the 16 bits x_i . y_j while passing the
// operands from gate to gate. The multi-operand adder (moa), 4 ABC half
// adders and 8 GPS full adders, sums them column by column into the 8-bit
// product. All gates are built from GDI cells (gdi_cell).
//
// The whole circuit uses 28 reversible gates and 28 constant inputs and
// leaves 28 garbage outputs, which are brought out so that nothing is left
// unconnected: garbage[19:0] are the adder's g19..g0, garbage[23:20] the X
// lines and garbage[27:24] the Y lines leaving the Toffoli array (equal to x
// and y).
//
// Interface: x, y in; prod, garbage out. Purely combinational: no clock,
// no reset; prod is valid one propagation delay after x and y settle.
module rev_mult4x4
  import rev_mult_pkg::*;
(
  input  logic [MULT_N-1:0]         x,
  input  logic [MULT_N-1:0]         y,
  output logic [PROD_W-1:0]         prod,
  output logic [TOTAL_GARBAGE-1:0]  garbage
);

  pp_t pp;

  ppg #(.N(MULT_N)) u_ppg (
    .x     (x),
    .y     (y),
    .pp    (pp),
    .x_out (garbage[MOA_GARBAGE +: MULT_N]),
    .y_out (garbage[MOA_GARBAGE + MULT_N +: MULT_N])
  );

  moa u_moa (
    .pp      (pp),
    .prod    (prod),
    .garbage (garbage[MOA_GARBAGE-1:0])
  );

endmodule
