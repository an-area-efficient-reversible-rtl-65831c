// tb_rev_mult4x4: end-to-end test of the 4x4 reversible multiplier at its
// only size.
//
// All 256 operand pairs are applied; the product is compared with x * y and
// the eight pass-through garbage lines with the operands. The design has no
// state, so it has no stall or mode to provoke; what it does have is twelve
// adder gates whose carry outputs are each needed for some products. The
// test counts how often each ABC half-adder carry and each GPS full-adder
// carry is 1, and counts a failure for any that never is (such a carry would
// be untested). It also counts products that need the top bit P7.
module tb_rev_mult4x4;
  import rev_mult_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [MULT_N-1:0]        x, y;
  logic [PROD_W-1:0]        prod;
  logic [TOTAL_GARBAGE-1:0] garbage;

  rev_mult4x4 dut (.x(x), .y(y), .prod(prod), .garbage(garbage));

  // carries of the 12 adder gates: bits 3:0 the ABC gates, 11:4 the GPS gates
  logic [11:0] carry;
  assign carry = {dut.u_moa.u_lo5.s, dut.u_moa.u_lo4.s, dut.u_moa.u_lo3.s, dut.u_moa.u_lo2.s,
                  dut.u_moa.u_ul3.s, dut.u_moa.u_ul2.s, dut.u_moa.u_ur3.s, dut.u_moa.u_ur2.s,
                  dut.u_moa.u_lo1.r, dut.u_moa.u_ul1.r, dut.u_moa.u_ur4.r, dut.u_moa.u_ur1.r};

  int carry_count [12];
  int top_bit_count = 0;

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 12; k++) carry_count[k] = 0;
    for (int v = 0; v < 256; v++) begin
      {x, y} = 8'(v);
      #1;
      checks++;
      if (int'(prod) != int'(x) * int'(y)) begin
        failures++;
        $display("FAIL %0d * %0d = %0d", x, y, prod);
      end
      checks++;
      if (garbage[MOA_GARBAGE +: 2 * MULT_N] !== {y, x}) begin
        failures++;
        $display("FAIL x=%0d y=%0d pass-through garbage %b", x, y, garbage);
      end
      for (int k = 0; k < 12; k++) if (carry[k]) carry_count[k]++;
      if (prod[7]) top_bit_count++;
    end
    for (int k = 0; k < 12; k++) begin
      $display("adder %0d (%s) carry=1 in %0d products", k, k < 4 ? "ABC" : "GPS", carry_count[k]);
      checks++;
      if (carry_count[k] == 0) begin
        failures++;
        $display("FAIL adder %0d never carried", k);
      end
    end
    $display("products using P7: %0d", top_bit_count);
    checks++;
    if (top_bit_count == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
