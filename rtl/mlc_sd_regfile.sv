// mlc_sd_regfile: register file of SD words in a multi-bit memristor array.
//
// DEPTH words of W signed digits; each digit is one three-level cell, so a
// word costs W cells instead of the 2W bits of the (p,n) coding. One write
// port (synchronous, programs the levels of a whole word on the clock edge)
// and two read ports (combinational, like the threshold read of a selected
// crossbar row). A read of the word being written returns the old value.
// Port count, depth and the synchronous active-low reset to all-zero words
// are this design's choices.
module mlc_sd_regfile
  import sd_pkg::*;
#(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic      [AW-1:0]   waddr,
  input  sd_digit_t [W-1:0]    wdata,
  input  logic      [AW-1:0]   raddr0,
  output sd_digit_t [W-1:0]    rdata0,
  input  logic      [AW-1:0]   raddr1,
  output sd_digit_t [W-1:0]    rdata1
);
  mlc_level_t mem [DEPTH][W];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < DEPTH; r++)
        for (int i = 0; i < W; i++) mem[r][i] <= LVL_ZERO;
    end else if (we && (32'(waddr) < DEPTH)) begin
      for (int i = 0; i < W; i++) mem[waddr][i] <= level_of(wdata[i]);
    end
  end

  always_comb begin
    for (int i = 0; i < W; i++) begin
      rdata0[i] = SD_ZERO;
      rdata1[i] = SD_ZERO;
      if (32'(raddr0) < DEPTH) rdata0[i] = digit_of_read(read_of_level(mem[raddr0][i]));
      if (32'(raddr1) < DEPTH) rdata1[i] = digit_of_read(read_of_level(mem[raddr1][i]));
    end
  end
endmodule
