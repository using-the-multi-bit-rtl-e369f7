// sd_mem_system: behavioural (simulation-only) model of the whole unit, with
// the SD arithmetic coupled to an analog multi-bit memristor memory.
//
// The synthesizable arithmetic unit sd_mem_alu (register file with add/sub
// row, multiplier pipeline, divider pipeline) is joined to mlc_crossbar, a
// behavioural memory of XB_ROWS words of 2N three-level memristor cells read
// through threshold comparators. The comparators' one-hot read lines, turned
// into SD digits, feed the add/sub row directly: with as_ext set, the row
// takes the word last read from the crossbar as its SD operand, adds or
// subtracts as_b and writes the sum to register as_rd. This is the coupling
// of a crossbar memory through its read comparators to the SD arithmetic
// circuit that the design is built around.
//
// Interface: all ports of sd_mem_alu except as_ext_a, plus the crossbar's
// own handshake (xb_we/xb_re rising edges start a write or a read, xb_busy
// is high while one runs, xb_err flags a digit that failed to program).
// xb_rdata holds the last word read. The crossbar runs in simulation time,
// not on clk: a read takes one time unit, a write many pulses per digit, so
// software (here the testbench) waits for xb_busy to fall before it uses
// xb_rdata. The memory size and this handshake are this design's choices.
module sd_mem_system
  import sd_pkg::*;
#(
  parameter int unsigned N       = 8,
  parameter int unsigned DEPTH   = 8,
  parameter int unsigned XB_ROWS = 4,
  localparam int unsigned RW     = 2 * N,
  localparam int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned XAW    = (XB_ROWS > 1) ? $clog2(XB_ROWS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // add/sub unit on the register file
  input  logic                 as_valid,
  input  logic                 as_sub,
  input  logic                 as_load,
  input  logic                 as_ext,
  input  logic      [AW-1:0]   as_ra,
  input  logic      [AW-1:0]   as_rd,
  input  logic      [RW-1:0]   as_b,
  input  logic      [AW-1:0]   rd_addr,
  output sd_digit_t [RW-1:0]   rd_sd,
  output logic      [RW-1:0]   rd_bin,
  // multiplier
  input  logic                 mul_in_valid,
  input  logic      [N-1:0]    mul_a,
  input  logic      [N-1:0]    mul_b,
  output logic                 mul_out_valid,
  output sd_digit_t [RW-1:0]   mul_p_sd,
  output logic      [RW-1:0]   mul_p,
  // divider
  input  logic                 div_in_valid,
  input  logic      [N-1:0]    div_a,
  input  logic      [N-1:0]    div_b,
  output logic                 div_out_valid,
  output sd_digit_t [N-1:0]    div_q_sd,
  output logic      [N:0]      div_q,
  output logic      [N+1:0]    div_r,
  // memristor crossbar memory
  input  logic                 xb_we,
  input  logic      [XAW-1:0]  xb_waddr,
  input  sd_digit_t [RW-1:0]   xb_wdata,
  input  logic                 xb_re,
  input  logic      [XAW-1:0]  xb_raddr,
  output sd_digit_t [RW-1:0]   xb_rdata,
  output logic                 xb_busy,
  output logic                 xb_err
);
  mlc_crossbar #(.ROWS(XB_ROWS), .COLS(RW)) u_xb (
    .we(xb_we), .waddr(xb_waddr), .wdata(xb_wdata),
    .re(xb_re), .raddr(xb_raddr), .rdata(xb_rdata),
    .busy(xb_busy), .err(xb_err)
  );

  sd_mem_alu #(.N(N), .DEPTH(DEPTH)) u_alu (
    .clk(clk), .rst_n(rst_n),
    .as_valid(as_valid), .as_sub(as_sub), .as_load(as_load), .as_ra(as_ra), .as_rd(as_rd),
    .as_b(as_b), .as_ext(as_ext), .as_ext_a(xb_rdata),
    .rd_addr(rd_addr), .rd_sd(rd_sd), .rd_bin(rd_bin),
    .mul_in_valid(mul_in_valid), .mul_a(mul_a), .mul_b(mul_b),
    .mul_out_valid(mul_out_valid), .mul_p_sd(mul_p_sd), .mul_p(mul_p),
    .div_in_valid(div_in_valid), .div_a(div_a), .div_b(div_b),
    .div_out_valid(div_out_valid), .div_q_sd(div_q_sd), .div_q(div_q), .div_r(div_r)
  );
endmodule
