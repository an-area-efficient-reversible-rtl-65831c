// tb_moa: exhaustive check of the multi-operand adder.
//
// The adder weights pp[i][j] by 2^(i+j) and sums; the largest such sum is
// 225, so it fits the 8-bit product for any pattern of partial products, not
// only those of a real multiplication. All 65536 patterns are driven and the
// product compared with the weighted sum computed here. The four ABC gates'
// P garbage outputs, which simply repeat their A input, are checked too.
module tb_moa;
  import rev_mult_pkg::*;

  int checks = 0;
  int failures = 0;

  pp_t                     pp;
  logic [PROD_W-1:0]       prod;
  logic [MOA_GARBAGE-1:0]  garbage;

  moa dut (.pp(pp), .prod(prod), .garbage(garbage));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int v = 0; v < (1 << 16); v++) begin
      pp = pp_t'(v);
      #1;
      exp = 0;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          if (pp[i][j]) exp += 1 << (i + j);
      checks++;
      if (int'(prod) != exp) begin
        failures++;
        if (failures < 20) $display("FAIL pp=%h prod=%0d expected %0d", v, prod, exp);
      end
      checks++;
      if ({garbage[0], garbage[6], garbage[11]} !== {pp[1][0], pp[1][2], pp[1][1]}) begin
        failures++;
        if (failures < 20) $display("FAIL pp=%h ABC garbage %b", v, garbage);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
