// q_select_tb: quotient digit selection against the true sign of r.
// Random remainders whose magnitude stays below 2^(W-2): q = 1 requires
// r > 0, q = -1 requires r < 0, q = 0 requires |r| < 2^P. Remainders with
// digits only below P and exact multiples of 2^P are mixed in.
module q_select_tb;
  import sd_pkg::*;
  localparam int W = 18, P = 7;
  sd_digit_t [W-1:0] r;
  sd_digit_t q;
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0, n_zero = 0;

  q_select #(.W(W), .P(P)) dut (.r(r), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v;
    int top, low;
    for (int t = 0; t < 4000; t++) begin
      top = (t % 4 == 0) ? P : W - 2;
      low = (t % 7 == 0) ? P : 0;
      v = 0;
      r = '0;
      for (int i = low; i < top; i++) begin
        case ($urandom_range(2))
          0: begin r[i] = SD_NEG; v -= longint'(1) <<< i; end
          1: r[i] = SD_ZERO;
          default: begin r[i] = SD_POS; v += longint'(1) <<< i; end
        endcase
      end
      #1;
      checks++;
      if (q == SD_POS) n_pos++;
      else if (q == SD_NEG) n_neg++;
      else n_zero++;
      if ((q == SD_POS && !(v > 0)) || (q == SD_NEG && !(v < 0)) ||
          (q == SD_ZERO && !(v < (longint'(1) <<< P) && v > -(longint'(1) <<< P))) ||
          (q.p && q.n)) begin
        failures++;
        if (failures < 10) $display("FAIL r=%0d q=%0b%0b", v, q.p, q.n);
      end
    end
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL not every digit seen: %0d %0d %0d", n_pos, n_zero, n_neg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
