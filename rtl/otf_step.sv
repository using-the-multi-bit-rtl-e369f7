// otf_step: one step of on-the-fly conversion of SD digits to two's complement.
//
// Quotient digits arrive most significant first. Two registers are kept:
// qa, the value converted so far, and qb = qa - 1. For the next digit q:
//   q =  1 : qa' = 2*qa + 1   qb' = 2*qa
//   q =  0 : qa' = 2*qa       qb' = 2*qb + 1
//   q = -1 : qa' = 2*qb + 1   qb' = 2*qb
// so each step only shifts and appends a bit; no carry propagates. Start
// with qa = 0, qb = -1 (all ones). Results are W-bit two's complement,
// exact modulo 2^W. Combinational; the divider puts one step in each row.
module otf_step
  import sd_pkg::*;
#(
  parameter int unsigned W = 9
) (
  input  sd_digit_t       q,
  input  logic [W-1:0]    qa_in,
  input  logic [W-1:0]    qb_in,
  output logic [W-1:0]    qa_out,
  output logic [W-1:0]    qb_out
);
  always_comb begin
    if (q.p && !q.n) begin
      qa_out = {qa_in[W-2:0], 1'b1};
      qb_out = {qa_in[W-2:0], 1'b0};
    end else if (q.n && !q.p) begin
      qa_out = {qb_in[W-2:0], 1'b1};
      qb_out = {qb_in[W-2:0], 1'b0};
    end else begin
      qa_out = {qa_in[W-2:0], 1'b0};
      qb_out = {qb_in[W-2:0], 1'b1};
    end
  end
endmodule
