// mlc_sd_reg_tb: check of the multi-level-cell SD register.
// Reset must clear every digit to 0; with en = 1 the word written appears one
// clock later; with en = 0 the stored word is held.
module mlc_sd_reg_tb;
  import sd_pkg::*;
  localparam int W = 8;
  logic clk = 1'b0, rst_n, en;
  sd_digit_t [W-1:0] d, q, model;
  int checks = 0, failures = 0;

  mlc_sd_reg #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sd_digit_t rand_digit();
    case ($urandom_range(2))
      0: return SD_NEG;
      1: return SD_ZERO;
      default: return SD_POS;
    endcase
  endfunction

  initial begin
    rst_n = 1'b0; en = 1'b1;
    for (int i = 0; i < W; i++) d[i] = SD_POS;
    @(posedge clk); #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    model = '0;
    for (int t = 0; t < 1000; t++) begin
      for (int i = 0; i < W; i++) d[i] = rand_digit();
      en = ($urandom_range(3) != 0);
      @(posedge clk);
      if (en) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d q=%h want %h", t, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
