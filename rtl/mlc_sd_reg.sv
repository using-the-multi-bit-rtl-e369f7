// mlc_sd_reg: register of W signed digits kept in three-level memristor cells.
//
// The point of the design is that an SD digit, which needs two flip-flops in
// the (p,n) coding, fits one multi-bit memristor cell. This register is the
// digital view of such a row of cells: on a clock edge with en = 1 each
// digit is programmed to one of three levels (sd_pkg::level_of), and the
// output is what the threshold read of every cell returns, the one-hot
// Out0/Out1/Out2 turned back into (p,n) (sd_pkg::digit_of_read). The level
// assignment and the reset value (all cells at the zero level, active-low
// synchronous reset) are this design's choices. One cycle from d to q.
module mlc_sd_reg
  import sd_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  sd_digit_t [W-1:0]    d,
  output sd_digit_t [W-1:0]    q
);
  mlc_level_t lvl [W];

  always_ff @(posedge clk) begin
    for (int i = 0; i < W; i++) begin
      if (!rst_n)  lvl[i] <= LVL_ZERO;
      else if (en) lvl[i] <= level_of(d[i]);
    end
  end

  always_comb begin
    for (int i = 0; i < W; i++) q[i] = digit_of_read(read_of_level(lvl[i]));
  end
endmodule
