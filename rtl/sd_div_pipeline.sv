// sd_div_pipeline: linear pipeline of N ADD-SUB-shift rows, an SD integer divider.
//
// Divides the N-bit unsigned A by the N-bit unsigned B (B > 0) and produces
// N quotient digits q_(N-1) .. q_0 in {-1, 0, 1}, most significant first:
//   r = A
//   for i = 1 .. N:  q_(N-i) = sign(r);  r = 2 * (r - q_(N-i) * D)
// with the divisor aligned once as D = B * 2^(N-1). Each row selects its
// digit with q_select and applies it to its sd_add_row: q = 1 subtracts D,
// q = -1 adds D, q = 0 pulls zero_n low (add 0). Because every digit is the
// sign of r, |r| < 2D holds after each row, and at the end
//   A = Q * B + R,  Q = sum q_(N-i) 2^(N-i),  R = r_N / 2^N,  -B < R < B.
// So Q is the quotient within one of floor(A / B); R tells which.
//
// The remainder has W = 2N+2 digits and is kept modulo 2^W; q_select looks
// at digits W-1 .. N-1, whose sum cannot wrap because |r| < 2^(2N). Each row
// also carries one on-the-fly conversion step (otf_step), so the quotient
// arrives in two's complement (N+1 bits) with no carry-propagating adder.
// Remainders are held in multi-bit memristor registers (mlc_sd_reg);
// divisor, digits and the conversion registers in flip-flops.
//
// Timing: one operation per clock; the result appears N clocks after
// in_valid, with out_valid.
module sd_div_pipeline
  import sd_pkg::*;
#(
  parameter int unsigned N = 8,
  localparam int unsigned W  = 2 * N + 2,
  localparam int unsigned QW = N + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic      [N-1:0]    a,
  input  logic      [N-1:0]    b,
  output logic                 out_valid,
  output sd_digit_t [N-1:0]    q_sd,     // q_sd[N-1] is the first digit
  output logic      [QW-1:0]   q,        // quotient, two's complement
  output sd_digit_t [W-1:0]    r_sd      // final remainder times 2^N
);
  sd_digit_t [W-1:0]  r_st  [N+1];
  logic      [W-1:0]  d_st  [N+1];
  sd_digit_t [N-1:0]  qd_st [N+1];
  logic      [QW-1:0] qa_st [N+1];
  logic      [QW-1:0] qb_st [N+1];
  logic               v_st  [N+1];

  always_comb begin
    for (int i = 0; i < int'(W); i++) begin
      r_st[0][i].p = (i < int'(N)) ? a[i] : 1'b0;
      r_st[0][i].n = 1'b0;
    end
    d_st[0]  = W'(b) << (N - 1);
    qd_st[0] = '0;
    qa_st[0] = '0;
    qb_st[0] = '1;
    v_st[0]  = in_valid;
  end

  for (genvar k = 0; k < N; k++) begin : g_row
    sd_digit_t          qk;
    sd_digit_t [W:0]    sum;
    logic      [W-1:0]  d_pass;
    sd_digit_t [W-1:0]  r_next;
    sd_digit_t [N-1:0]  qd_next;
    logic      [QW-1:0] qa_next, qb_next;

    q_select #(.W(W), .P(N - 1)) u_qsel (.r(r_st[k]), .q(qk));

    sd_add_row #(.W(W)) u_row (
      .sub   (qk.p),
      .zero_n(qk.p | qk.n),
      .a     (r_st[k]),
      .b     (d_st[k]),
      .s     (sum),
      .b_out (d_pass)
    );

    otf_step #(.W(QW)) u_otf (
      .q(qk), .qa_in(qa_st[k]), .qb_in(qb_st[k]), .qa_out(qa_next), .qb_out(qb_next)
    );

    always_comb begin
      r_next  = {sum[W-2:0], SD_ZERO};
      qd_next = qd_st[k];
      qd_next[N-1-k] = qk;
    end

    mlc_sd_reg #(.W(W)) u_rreg (
      .clk(clk), .rst_n(rst_n), .en(1'b1), .d(r_next), .q(r_st[k+1])
    );

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        v_st[k+1]  <= 1'b0;
        d_st[k+1]  <= '0;
        qd_st[k+1] <= '0;
        qa_st[k+1] <= '0;
        qb_st[k+1] <= '1;
      end else begin
        v_st[k+1]  <= v_st[k];
        d_st[k+1]  <= d_pass;
        qd_st[k+1] <= qd_next;
        qa_st[k+1] <= qa_next;
        qb_st[k+1] <= qb_next;
      end
    end
  end

  always_comb begin
    out_valid = v_st[N];
    q_sd      = qd_st[N];
    q         = qa_st[N];
    r_sd      = r_st[N];
  end
endmodule
