// tb_gps_gate: exhaustive check of the GPS gate.
//
// For all sixteen inputs it checks P = B xor C, Q = AB' + (A xnor B)C,
// R = A xor B xor C xor D and S = AB + BC + CA, then that the sixteen outputs
// are all different (reversible) and that with D = 0 the gate adds A, B and
// C: {S, R} = A + B + C.
module tb_gps_gate;

  int checks = 0;
  int failures = 0;

  logic a, b, c, d, p, q, r, s;

  gps_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  task automatic check(input logic [3:0] got, input logic [3:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [15:0] seen = '0;
    logic ep, eq, er, es;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      ep = b ^ c;
      eq = (a && !b) || ((a == b) && c);
      er = a ^ b ^ c ^ d;
      es = (a && b) || (b && c) || (c && a);
      check({p, q, r, s}, {ep, eq, er, es}, $sformatf("in=%04b", v));
      seen[{p, q, r, s}] = 1'b1;
      if (!d) check({2'b00, s, r}, 4'(int'(a) + int'(b) + int'(c)), $sformatf("full add in=%04b", v));
    end
    checks++;
    if (seen != 16'hFFFF) begin
      failures++;
      $display("FAIL outputs not a permutation: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
