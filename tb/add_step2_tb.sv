// add_step2_tb: exhaustive check of the second addition step.
// s = c_(i-1) - z_i must come out as a valid SD digit (never 11).
module add_step2_tb;
  logic z_n, c_p, s_p, s_n;
  int checks = 0, failures = 0;

  add_step2 dut (.z_n(z_n), .c_p(c_p), .s_p(s_p), .s_n(s_n));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {z_n, c_p} = 2'(v);
      #1;
      checks++;
      if ((int'(s_p) - int'(s_n)) != (int'(c_p) - int'(z_n)) || (s_p && s_n)) begin
        failures++;
        $display("FAIL z=%0b c=%0b s=%0b%0b", z_n, c_p, s_p, s_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
