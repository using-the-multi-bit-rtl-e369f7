// sd_mul_pipeline: linear pipeline of N ADD-shift rows, an unsigned N x N multiplier.
//
// Shift-and-add with an SD partial sum: s = 0; for each of the N bits of A,
// most significant first, s = s + B if that bit is 1 (s + 0 otherwise, by
// pulling the rows' zero_n low), then s and A are shifted left; the last row
// adds without shifting. Each row is one sd_add_row, so its delay does not
// depend on N. Between rows, s is held in multi-bit memristor registers
// (mlc_sd_reg, one cell per digit); A and B travel in ordinary flip-flops.
//
// Timing: one operation can enter per clock (in_valid); its product leaves
// N clocks later with out_valid. The partial sum is 2N digits wide and kept
// modulo 2^(2N): the transfer out of the top digit and the digit shifted out
// are dropped, which cannot change the final product (< 2^(2N)). The output
// is the SD product and its two's complement conversion. The row structure
// follows the document; widths, the valid bit and reset are this design's.
module sd_mul_pipeline
  import sd_pkg::*;
#(
  parameter int unsigned N = 8,
  localparam int unsigned PW = 2 * N
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic      [N-1:0]     a,
  input  logic      [N-1:0]     b,
  output logic                  out_valid,
  output sd_digit_t [PW-1:0]    p_sd,
  output logic      [PW-1:0]    p
);
  // Stage k holds the operands entering row k; stage 0 is the input port.
  sd_digit_t [PW-1:0] s_st [N+1];
  logic      [N-1:0]  a_st [N+1];
  logic      [N-1:0]  b_st [N+1];
  logic               v_st [N+1];

  always_comb begin
    s_st[0] = '0;
    a_st[0] = a;
    b_st[0] = b;
    v_st[0] = in_valid;
  end

  for (genvar k = 0; k < N; k++) begin : g_row
    sd_digit_t [PW:0]   sum;
    logic      [PW-1:0] b_pass;
    sd_digit_t [PW-1:0] s_next;

    sd_add_row #(.W(PW)) u_row (
      .sub   (1'b0),
      .zero_n(a_st[k][N-1]),
      .a     (s_st[k]),
      .b     ({{(PW-N){1'b0}}, b_st[k]}),
      .s     (sum),
      .b_out (b_pass)
    );

    if (k < N - 1) begin : g_shift
      always_comb s_next = {sum[PW-2:0], SD_ZERO};
    end else begin : g_last
      always_comb s_next = sum[PW-1:0];
    end

    mlc_sd_reg #(.W(PW)) u_sreg (
      .clk(clk), .rst_n(rst_n), .en(1'b1), .d(s_next), .q(s_st[k+1])
    );

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        v_st[k+1] <= 1'b0;
        a_st[k+1] <= '0;
        b_st[k+1] <= '0;
      end else begin
        v_st[k+1] <= v_st[k];
        a_st[k+1] <= {a_st[k][N-2:0], 1'b0};
        b_st[k+1] <= b_pass[N-1:0];
      end
    end
  end

  always_comb begin
    out_valid = v_st[N];
    p_sd      = s_st[N];
  end

  sd_to_bin #(.W(PW)) u_conv (.sd(s_st[N]), .bin(p));
endmodule
