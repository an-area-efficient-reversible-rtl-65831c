// rev_mult_pkg: constants and types shared by the reversible multiplier.
//
// The multiplier is 4 bits by 4 bits. Its partial products are held as a
// 4x4 packed array indexed [i][j] = x_i . y_j, which is the hand-off between
// the partial product generator (ppg) and the multi-operand adder (moa).
// The garbage counts are those of the gate network as built here: each ABC
// half adder leaves one unused output, each GPS full adder two, and the
// Toffoli array leaves the four X and four Y lines that run off its edges.
package rev_mult_pkg;

  localparam int unsigned MULT_N = 4;               // operand width
  localparam int unsigned PROD_W = 2 * MULT_N;      // product width
  localparam int unsigned NUM_ABC = 4;              // ABC gates in the adder
  localparam int unsigned NUM_GPS = 8;              // GPS gates in the adder
  localparam int unsigned MOA_GARBAGE = NUM_ABC + 2 * NUM_GPS;     // 20
  localparam int unsigned PPG_GARBAGE = 2 * MULT_N;                // 8
  localparam int unsigned TOTAL_GARBAGE = MOA_GARBAGE + PPG_GARBAGE; // 28

  // pp[i][j] = x[i] & y[j]
  typedef logic [MULT_N-1:0][MULT_N-1:0] pp_t;

endpackage
