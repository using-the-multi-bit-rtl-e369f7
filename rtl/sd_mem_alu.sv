// sd_mem_alu: signed-digit arithmetic unit with a multi-bit memristor register file.
//
// Three units stand side by side; all keep signed digits (SD, digits in
// {-1,0,1}) in three-level memristor cells, one cell per digit:
//  * add/sub: reads SD word ra from the register file, adds or subtracts the
//    RW-bit binary number as_b in one carry-free sd_add_row and writes the
//    result to register rd on the same clock edge. as_load uses 0 instead of
//    register ra, which loads +/-as_b; as_ext uses the SD word as_ext_a
//    (the read lines of an external multi-bit memory) instead of register
//    ra. as_load wins over as_ext. Words are RW = 2N digits and kept
//    modulo 2^RW (the transfer out of the top digit is dropped). A second
//    read port shows any register as SD and in two's complement.
//  * multiplier: sd_mul_pipeline, N x N unsigned, one operation per clock,
//    product after N clocks.
//  * divider: sd_div_pipeline, N / N unsigned, one operation per clock,
//    quotient (SD and two's complement) and remainder after N clocks; the
//    remainder is converted here: R = value(r_sd) / 2^N.
// Linking the register file to the add/sub row this way, the load option
// and the register count are this design's choices; the units themselves
// follow the document.
module sd_mem_alu
  import sd_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned RW   = 2 * N,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned DW   = 2 * N + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // add/sub unit on the register file
  input  logic                 as_valid,
  input  logic                 as_sub,
  input  logic                 as_load,
  input  logic      [AW-1:0]   as_ra,
  input  logic      [AW-1:0]   as_rd,
  input  logic      [RW-1:0]   as_b,
  input  logic                 as_ext,
  input  sd_digit_t [RW-1:0]   as_ext_a,
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
  output logic      [N+1:0]    div_r
);
  // ---------------- register file and add/sub row ----------------
  sd_digit_t [RW-1:0] opa, opa_rf;
  sd_digit_t [RW:0]   as_sum;
  logic      [RW-1:0] as_b_unused;

  mlc_sd_regfile #(.W(RW), .DEPTH(DEPTH)) u_rf (
    .clk(clk), .rst_n(rst_n),
    .we(as_valid), .waddr(as_rd), .wdata(as_sum[RW-1:0]),
    .raddr0(as_ra), .rdata0(opa_rf),
    .raddr1(rd_addr), .rdata1(rd_sd)
  );

  always_comb opa = as_load ? '0 : (as_ext ? as_ext_a : opa_rf);

  sd_add_row #(.W(RW)) u_as_row (
    .sub(as_sub), .zero_n(1'b1), .a(opa), .b(as_b), .s(as_sum), .b_out(as_b_unused)
  );

  sd_to_bin #(.W(RW)) u_rd_conv (.sd(rd_sd), .bin(rd_bin));

  // ---------------- multiplier ----------------
  sd_mul_pipeline #(.N(N)) u_mul (
    .clk(clk), .rst_n(rst_n), .in_valid(mul_in_valid), .a(mul_a), .b(mul_b),
    .out_valid(mul_out_valid), .p_sd(mul_p_sd), .p(mul_p)
  );

  // ---------------- divider ----------------
  sd_digit_t [DW-1:0] div_r_sd;
  logic      [DW-1:0] div_r_scaled;

  sd_div_pipeline #(.N(N)) u_div (
    .clk(clk), .rst_n(rst_n), .in_valid(div_in_valid), .a(div_a), .b(div_b),
    .out_valid(div_out_valid), .q_sd(div_q_sd), .q(div_q), .r_sd(div_r_sd)
  );

  sd_to_bin #(.W(DW)) u_rem_conv (.sd(div_r_sd), .bin(div_r_scaled));

  // The remainder is exactly divisible by 2^N, so the low bits are zero.
  always_comb div_r = div_r_scaled[DW-1:N];
endmodule
