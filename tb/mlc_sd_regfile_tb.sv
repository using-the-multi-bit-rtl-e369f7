// mlc_sd_regfile_tb: random writes and reads against a model array.
// Both read ports are checked every cycle, before the write of that cycle
// takes effect (old value on a same-address read).
module mlc_sd_regfile_tb;
  import sd_pkg::*;
  localparam int W = 16, DEPTH = 8, AW = 3;
  logic clk = 1'b0, rst_n, we;
  logic [AW-1:0] waddr, raddr0, raddr1;
  sd_digit_t [W-1:0] wdata, rdata0, rdata1;
  sd_digit_t [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  mlc_sd_regfile #(.W(W), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata),
    .raddr0(raddr0), .rdata0(rdata0), .raddr1(raddr1), .rdata1(rdata1));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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
    rst_n = 1'b0; we = 1'b0; waddr = '0; wdata = '0; raddr0 = '0; raddr1 = '0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    for (int r = 0; r < DEPTH; r++) model[r] = '0;
    for (int t = 0; t < 3000; t++) begin
      we     = 1'($urandom);
      waddr  = AW'($urandom);
      raddr0 = AW'($urandom);
      raddr1 = AW'($urandom);
      for (int i = 0; i < W; i++) wdata[i] = rand_digit();
      #1;
      checks += 2;
      if (rdata0 !== model[raddr0]) begin
        failures++;
        if (failures < 10) $display("FAIL port0 addr %0d", raddr0);
      end
      if (rdata1 !== model[raddr1]) begin
        failures++;
        if (failures < 10) $display("FAIL port1 addr %0d", raddr1);
      end
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
