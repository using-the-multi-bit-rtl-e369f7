// q_select: quotient digit selection of the SD divider.
//
// The quotient digit is the sign of the partial remainder r: 1 if r > 0,
// 0 if r = 0, -1 (the digit 1-bar) if r < 0, judged from the leading digits
// of r only. The estimate is the value of digits W-1 down to P, formed as
// (positive parts - negative parts) in a (W-P)-bit two's complement adder,
// so it is exact apart from the truncated digits below P, whose sum is
// smaller than one unit of digit P. The divider keeps |r| small enough that
// the estimate never wraps. Looking at all digits from P up, rather than at
// three, is this design's choice (see sd_div_pipeline). Combinational.
module q_select
  import sd_pkg::*;
#(
  parameter int unsigned W = 18,
  parameter int unsigned P = 7
) (
  input  sd_digit_t [W-1:0] r,
  output sd_digit_t         q
);
  localparam int unsigned EW = W - P;

  logic [EW-1:0] pos, neg;
  logic signed [EW-1:0] est;

  always_comb begin
    for (int i = 0; i < int'(EW); i++) begin
      pos[i] = r[P+i].p;
      neg[i] = r[P+i].n;
    end
    est = signed'(pos - neg);
    if (est > 0)      q = SD_POS;
    else if (est < 0) q = SD_NEG;
    else              q = SD_ZERO;
  end
endmodule
