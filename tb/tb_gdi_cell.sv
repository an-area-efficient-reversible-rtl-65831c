// tb_gdi_cell: exhaustive check of the GDI cell's switching function.
//
// Drives all eight (g, p, n) patterns and expects d = n when g = 1 and d = p
// when g = 0 (the NMOS passes N, the PMOS passes P). It then wires the cell
// in each of the six input configurations of the GDI function table and
// checks the resulting two-input functions of A, B (and C) against
// independently written Boolean expressions.
module tb_gdi_cell;

  int checks = 0;
  int failures = 0;

  logic g, p, n, d;

  gdi_cell dut (.g(g), .p(p), .n(n), .d(d));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
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
    logic a, b, c;
    // raw truth table
    for (int v = 0; v < 8; v++) begin
      {g, p, n} = 3'(v);
      #1;
      check(d, (g && n) || (!g && p), $sformatf("raw g=%0b p=%0b n=%0b", g, p, n));
    end
    // the six configurations of the function table
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      g = a; n = 1'b0; p = b;    #1; check(d, !a && b,          "N=0 P=B: A'B");
      g = a; n = b;    p = 1'b1; #1; check(d, !a || b,          "N=B P=1: A'+B");
      g = a; n = 1'b1; p = b;    #1; check(d, a || b,           "N=1 P=B: A+B");
      g = a; n = b;    p = 1'b0; #1; check(d, a && b,           "N=B P=0: AB");
      g = a; n = c;    p = b;    #1; check(d, (!a && b) || (a && c), "N=C P=B: A'B+AC");
      g = a; n = 1'b0; p = 1'b1; #1; check(d, !a,               "N=0 P=1: A'");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
