// otf_step_tb: on-the-fly conversion, one step at a time.
// First the worked example 1, -1, 0, 1, 0 (value 10): after each digit
// qa/qb must read 1/0, 01/00, 010/001, 0101/0100, 01010/01001. Then random
// digit strings: after every step qa = value so far and qb = qa - 1.
module otf_step_tb;
  import sd_pkg::*;
  localparam int W = 12;
  sd_digit_t q;
  logic [W-1:0] qa_in, qb_in, qa_out, qb_out;
  int checks = 0, failures = 0;

  otf_step #(.W(W)) dut (.q(q), .qa_in(qa_in), .qb_in(qb_in), .qa_out(qa_out), .qb_out(qb_out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ex_digit [5] = '{1, -1, 0, 1, 0};
    int ex_a [5] = '{1, 1, 2, 5, 10};
    int ex_b [5] = '{0, 0, 1, 4, 9};
    longint v;
    qa_in = '0; qb_in = '1;
    for (int k = 0; k < 5; k++) begin
      q = (ex_digit[k] == 1) ? SD_POS : (ex_digit[k] == -1) ? SD_NEG : SD_ZERO;
      #1;
      checks++;
      if (qa_out !== W'(ex_a[k]) || qb_out !== W'(ex_b[k])) begin
        failures++;
        $display("FAIL example step %0d: %0d %0d", k, qa_out, qb_out);
      end
      qa_in = qa_out; qb_in = qb_out;
    end
    for (int t = 0; t < 200; t++) begin
      qa_in = '0; qb_in = '1; v = 0;
      for (int k = 0; k < W - 1; k++) begin
        case ($urandom_range(2))
          0: begin q = SD_NEG;  v = 2 * v - 1; end
          1: begin q = SD_ZERO; v = 2 * v;     end
          default: begin q = SD_POS; v = 2 * v + 1; end
        endcase
        #1;
        checks++;
        if (qa_out !== W'(v) || qb_out !== W'(v - 1)) begin
          failures++;
          if (failures < 10) $display("FAIL random t=%0d k=%0d", t, k);
        end
        qa_in = qa_out; qb_in = qb_out;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
