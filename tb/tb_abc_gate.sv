// tb_abc_gate: exhaustive check of the ABC gate.
//
// For all eight inputs it checks P = A, Q = A xor B and
// R = A'C + B'C + ABC', written out as a sum of products, then that the eight
// outputs are all different (reversible) and that with C = 0 the gate adds A
// and B: {R, Q} = A + B.
module tb_abc_gate;

  int checks = 0;
  int failures = 0;

  logic a, b, c, p, q, r;

  abc_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

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
    logic exp_r;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      exp_r = (!a && c) || (!b && c) || (a && b && !c);
      check({p, q, r}, {a, a != b, exp_r}, $sformatf("in=%03b", v));
      seen[{p, q, r}] = 1'b1;
      if (!c) check({1'b0, r, q}, 3'(int'(a) + int'(b)), $sformatf("half add in=%03b", v));
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
