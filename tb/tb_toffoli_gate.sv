// tb_toffoli_gate: exhaustive check of the Toffoli gate.
//
// For all eight inputs it checks P = A, Q = B, R = AB xor C, that the eight
// outputs are all different (the gate is reversible), and that a second
// Toffoli gate fed with the first one's outputs gives back the inputs (the
// gate is its own inverse).
module tb_toffoli_gate;

  int checks = 0;
  int failures = 0;

  logic a, b, c, p, q, r, p2, q2, r2;

  toffoli_gate dut  (.a(a),  .b(b),  .c(c),  .p(p),  .q(q),  .r(r));
  toffoli_gate dut2 (.a(p),  .b(q),  .c(r),  .p(p2), .q(q2), .r(r2));

  task automatic check(input logic [2:0] got, input logic [2:0] exp, input string what);
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
    bit [7:0] seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      check({p, q, r}, {a, b, (a & b) ^ c}, $sformatf("in=%03b", v));
      check({p2, q2, r2}, {a, b, c}, $sformatf("self-inverse in=%03b", v));
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen != 8'hFF) begin
      failures++;
      $display("FAIL outputs not a permutation: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
