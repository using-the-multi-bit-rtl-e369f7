// sd_digit_cell_tb: exhaustive check of the digit processor cell.
// Over all valid a, B, incoming transfer, add/sub and zero_n:
//   add: a + B' + c_in = 2*c_out + s
//   sub: a - B' - c_in = -2*c_out + s      (B' = B & zero_n)
// the sum digit must be valid and B must be passed on unchanged.
module sd_digit_cell_tb;
  import sd_pkg::*;
  logic sub, zero_n, b, c_in, c_out, b_out;
  sd_digit_t a, s;
  int checks = 0, failures = 0;

  sd_digit_cell dut (.sub(sub), .zero_n(zero_n), .a(a), .b(b), .c_in_p(c_in),
                     .c_out_p(c_out), .s(s), .b_out(b_out));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bv, lhs, rhs, sv;
    for (int d = -1; d <= 1; d++)
      for (int v = 0; v < 16; v++) begin
        {sub, zero_n, b, c_in} = 4'(v);
        a.p = (d == 1);
        a.n = (d == -1);
        #1;
        bv = (b && zero_n) ? 1 : 0;
        sv = int'(s.p) - int'(s.n);
        if (!sub) begin
          lhs = d + bv + int'(c_in);
          rhs = 2 * int'(c_out) + sv;
        end else begin
          lhs = d - bv - int'(c_in);
          rhs = -2 * int'(c_out) + sv;
        end
        checks++;
        if (lhs != rhs || (s.p && s.n) || b_out !== b) begin
          failures++;
          $display("FAIL a=%0d sub=%0b zero_n=%0b B=%0b cin=%0b -> cout=%0b s=%0b%0b",
                   d, sub, zero_n, b, c_in, c_out, s.p, s.n);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
