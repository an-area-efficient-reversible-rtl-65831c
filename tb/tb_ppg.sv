// tb_ppg: exhaustive check of the 4x4 partial product generator.
//
// For all 256 operand pairs it checks every partial product
// pp[i][j] = x[i] & y[j] and that the operand lines leaving the array equal
// the operands.
module tb_ppg;

  localparam int unsigned N = 4;

  int checks = 0;
  int failures = 0;

  logic [N-1:0]        x, y, x_out, y_out;
  logic [N-1:0][N-1:0] pp;

  ppg #(.N(N)) dut (.x(x), .y(y), .pp(pp), .x_out(x_out), .y_out(y_out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * N)); v++) begin
      {x, y} = (2 * N)'(v);
      #1;
      for (int i = 0; i < N; i++) begin
        for (int j = 0; j < N; j++) begin
          checks++;
          if (pp[i][j] !== (x[i] & y[j])) begin
            failures++;
            $display("FAIL x=%h y=%h pp[%0d][%0d]=%b", x, y, i, j, pp[i][j]);
          end
        end
      end
      checks++;
      if (x_out !== x || y_out !== y) begin
        failures++;
        $display("FAIL x=%h y=%h x_out=%h y_out=%h", x, y, x_out, y_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
