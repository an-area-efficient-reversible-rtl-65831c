// moa: multi-operand adder of the 4x4 reversible multiplier.
//
// It sums the 16 partial products pp[i][j] = x_i . y_j, column by column
// (column k holds the products with i + j = k), into the product P7..P0.
// There are three ripple chains of reversible adders. An ABC gate with its
// C input tied to 0 is a half adder (Q = sum, R = carry, P garbage); a GPS
// gate with its D input tied to 0 is a full adder (R = sum, S = carry, P and
// Q garbage).
//
//   upper right : ABC(x1y0, x0y1)        -> P1, carry to column 2
//                 GPS(x0y2, x2y0, c)     -> column 2 sum, carry to column 3
//                 GPS(x0y3, x3y0, c)     -> column 3 sum, carry to column 4
//                 ABC(x1y3, c)           -> column 4 sum, carry to column 5
//   upper left  : ABC(x1y2, x2y1)        -> column 3 sum, carry to column 4
//                 GPS(x3y1, x2y2, c)     -> column 4 sum, carry to column 5
//                 GPS(x2y3, x3y2, c)     -> column 5 sum, carry to column 6
//   lower       : ABC(x1y1, col 2 sum)                        -> P2
//                 GPS(both column 3 sums, c)                  -> P3
//                 GPS(both column 4 sums, c)                  -> P4
//                 GPS(upper right column 5 carry, upper left
//                     column 5 sum, c)                        -> P5
//                 GPS(x3y3, upper left column 6 carry, c)     -> P6, carry P7
//   x0y0 is P0 directly.
//
// That is 4 ABC and 8 GPS gates, as in the proposed design, with one
// constant 0 per gate and 20 garbage outputs g0..g19 (each ABC gate's P, each
// GPS gate's P and Q, the lower index being P). The gate placement and the
// partial products on each gate are the proposed design's; which operand goes
// on which gate input is this design's own (the sum and carry do not depend
// on it).
//
// Interface: pp in; prod (8 bits), garbage (20 bits) out. Purely
// combinational; the longest path (seven gates) runs from x1y0/x0y1 through
// the first two upper right gates and then the whole lower chain to P7.
module moa
  import rev_mult_pkg::*;
(
  input  pp_t                     pp,       // pp[i][j] = x_i . y_j
  output logic [PROD_W-1:0]       prod,     // P7..P0
  output logic [MOA_GARBAGE-1:0]  garbage   // g19..g0
);

  // upper right chain
  logic s_ur1, c_ur1, s_ur2, c_ur2, s_ur3, c_ur3, s_ur4, c_ur4;
  // upper left chain
  logic s_ul1, c_ul1, s_ul2, c_ul2, s_ul3, c_ul3;
  // lower chain carries
  logic c_lo1, c_lo2, c_lo3, c_lo4;

  // ---- upper right chain ----
  abc_gate u_ur1 (.a(pp[1][0]), .b(pp[0][1]), .c(1'b0),
                  .p(garbage[0]), .q(s_ur1), .r(c_ur1));
  gps_gate u_ur2 (.a(pp[0][2]), .b(pp[2][0]), .c(c_ur1), .d(1'b0),
                  .p(garbage[1]), .q(garbage[2]), .r(s_ur2), .s(c_ur2));
  gps_gate u_ur3 (.a(pp[0][3]), .b(pp[3][0]), .c(c_ur2), .d(1'b0),
                  .p(garbage[3]), .q(garbage[4]), .r(s_ur3), .s(c_ur3));
  abc_gate u_ur4 (.a(pp[1][3]), .b(c_ur3), .c(1'b0),
                  .p(garbage[5]), .q(s_ur4), .r(c_ur4));

  // ---- upper left chain ----
  abc_gate u_ul1 (.a(pp[1][2]), .b(pp[2][1]), .c(1'b0),
                  .p(garbage[6]), .q(s_ul1), .r(c_ul1));
  gps_gate u_ul2 (.a(pp[3][1]), .b(pp[2][2]), .c(c_ul1), .d(1'b0),
                  .p(garbage[7]), .q(garbage[8]), .r(s_ul2), .s(c_ul2));
  gps_gate u_ul3 (.a(pp[2][3]), .b(pp[3][2]), .c(c_ul2), .d(1'b0),
                  .p(garbage[9]), .q(garbage[10]), .r(s_ul3), .s(c_ul3));

  // ---- lower chain, one product bit per gate ----
  abc_gate u_lo1 (.a(pp[1][1]), .b(s_ur2), .c(1'b0),
                  .p(garbage[11]), .q(prod[2]), .r(c_lo1));
  gps_gate u_lo2 (.a(s_ur3), .b(s_ul1), .c(c_lo1), .d(1'b0),
                  .p(garbage[12]), .q(garbage[13]), .r(prod[3]), .s(c_lo2));
  gps_gate u_lo3 (.a(s_ur4), .b(s_ul2), .c(c_lo2), .d(1'b0),
                  .p(garbage[14]), .q(garbage[15]), .r(prod[4]), .s(c_lo3));
  gps_gate u_lo4 (.a(c_ur4), .b(s_ul3), .c(c_lo3), .d(1'b0),
                  .p(garbage[16]), .q(garbage[17]), .r(prod[5]), .s(c_lo4));
  gps_gate u_lo5 (.a(pp[3][3]), .b(c_ul3), .c(c_lo4), .d(1'b0),
                  .p(garbage[18]), .q(garbage[19]), .r(prod[6]), .s(prod[7]));

  assign prod[0] = pp[0][0];
  assign prod[1] = s_ur1;

endmodule
