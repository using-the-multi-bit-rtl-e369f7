// add_step1_tb: exhaustive check of the first addition step.
// For every valid SD digit a and binary digit B the outputs must satisfy
// a + B = 2*c - z (c only positive, z only negative), worked out here from
// the arithmetic, not from the cell's equations.
module add_step1_tb;
  logic a_p, a_n, b, c_p, z_n;
  int checks = 0, failures = 0;

  add_step1 dut (.a_p(a_p), .a_n(a_n), .b(b), .c_p(c_p), .z_n(z_n));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int av, lhs, rhs;
    for (int d = -1; d <= 1; d++) begin
      for (int bb = 0; bb <= 1; bb++) begin
        a_p = (d == 1);
        a_n = (d == -1);
        b   = 1'(bb);
        #1;
        av  = d;
        lhs = av + bb;
        rhs = 2 * int'(c_p) - int'(z_n);
        checks++;
        if (lhs != rhs) begin
          failures++;
          $display("FAIL a=%0d B=%0d c=%0b z=%0b", d, bb, c_p, z_n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
