// ppg: partial product generator, an N x N array of Toffoli gates.
//
// Gate (i,j) receives A = x_i, B = y_j and the constant C = 0, so its R
// output is the partial product x_i . y_j. Because a reversible gate may not
// fan out a signal, the operands travel through the array instead: each
// gate's P output (x_i) feeds the next gate of row i, and its Q output (y_j)
// feeds the gate below it in column j. X enters each row at column 0 and Y
// enters each column at row 0; what leaves the far edges (x_out, y_out) is
// garbage and equals the inputs.
//
// The array arrangement follows the proposed design (16 Toffoli gates, one
// constant 0 per gate). N is a parameter; the proposed multiplier uses N = 4.
//
// Interface: x, y in; pp[i][j] = x[i] & y[j], x_out, y_out out.
// Purely combinational.
module ppg #(
  parameter int unsigned N = rev_mult_pkg::MULT_N
) (
  input  logic [N-1:0]         x,
  input  logic [N-1:0]         y,
  output logic [N-1:0][N-1:0]  pp,     // pp[i][j] = x[i] & y[j]
  output logic [N-1:0]         x_out,  // x after its row of gates
  output logic [N-1:0]         y_out   // y after its column of gates
);

  // x_w[i][j]: x_i entering gate (i,j); y_w[i][j]: y_j entering gate (i,j)
  logic [N-1:0][N:0]   x_w;
  logic [N:0][N-1:0]   y_w;

  for (genvar i = 0; i < N; i++) begin : g_row_in
    assign x_w[i][0] = x[i];
    assign x_out[i]  = x_w[i][N];
  end

  assign y_w[0] = y;
  assign y_out  = y_w[N];

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      toffoli_gate u_tg (
        .a (x_w[i][j]),
        .b (y_w[i][j]),
        .c (1'b0),
        .p (x_w[i][j+1]),
        .q (y_w[i+1][j]),
        .r (pp[i][j])
      );
    end
  end

endmodule
