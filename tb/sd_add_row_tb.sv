// sd_add_row_tb: random check of the W-digit SD +/- binary adder row.
// The value of the W+1 digit result must equal value(a) +/- B (or value(a)
// when zero_n = 0), every digit must be valid and B must pass through.
module sd_add_row_tb;
  import sd_pkg::*;
  localparam int W = 8;
  logic sub, zero_n;
  sd_digit_t [W-1:0] a;
  logic [W-1:0] b, b_out;
  sd_digit_t [W:0] s;
  int checks = 0, failures = 0;

  sd_add_row #(.W(W)) dut (.sub(sub), .zero_n(zero_n), .a(a), .b(b), .s(s), .b_out(b_out));

  function automatic longint val_a();
    longint v = 0;
    for (int i = 0; i < W; i++) v += (longint'(a[i].p) - longint'(a[i].n)) <<< i;
    return v;
  endfunction

  function automatic longint val_s();
    longint v = 0;
    for (int i = 0; i <= W; i++) v += (longint'(s[i].p) - longint'(s[i].n)) <<< i;
    return v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint expv;
    logic bad;
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < W; i++) begin
        case ($urandom_range(2))
          0: a[i] = SD_NEG;
          1: a[i] = SD_ZERO;
          default: a[i] = SD_POS;
        endcase
      end
      b      = W'($urandom);
      sub    = 1'($urandom);
      zero_n = ($urandom_range(7) != 0);
      #1;
      expv = val_a() + (zero_n ? (sub ? -longint'(b) : longint'(b)) : 0);
      bad = 1'b0;
      for (int i = 0; i <= W; i++) if (s[i].p && s[i].n) bad = 1'b1;
      checks++;
      if (val_s() != expv || bad || b_out !== b) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%0d B=%0d sub=%0b zero_n=%0b got %0d want %0d",
                   val_a(), b, sub, zero_n, val_s(), expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
