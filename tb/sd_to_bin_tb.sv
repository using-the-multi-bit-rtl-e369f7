// sd_to_bin_tb: random SD numbers converted to two's complement.
// Reference: the weighted digit sum, reduced modulo 2^W.
module sd_to_bin_tb;
  import sd_pkg::*;
  localparam int W = 16;
  sd_digit_t [W-1:0] sd;
  logic [W-1:0] bin;
  int checks = 0, failures = 0;

  sd_to_bin #(.W(W)) dut (.sd(sd), .bin(bin));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v;
    for (int t = 0; t < 2000; t++) begin
      v = 0;
      for (int i = 0; i < W; i++) begin
        case ($urandom_range(2))
          0: begin sd[i] = SD_NEG; v -= longint'(1) <<< i; end
          1: sd[i] = SD_ZERO;
          default: begin sd[i] = SD_POS; v += longint'(1) <<< i; end
        endcase
      end
      #1;
      checks++;
      if (bin !== W'(v)) begin
        failures++;
        if (failures < 10) $display("FAIL value %0d got %h", v, bin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
