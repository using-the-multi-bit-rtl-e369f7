// sd_to_bin: parallel conversion of a W-digit SD number to two's complement.
//
// The value of an SD number is the binary number of its positive parts
// minus the binary number of its negative parts, so one W-bit subtractor
// does it. The result is exact modulo 2^W; it is the true value whenever
// that lies in [-2^(W-1), 2^(W-1)). Combinational. (Digit-serial results,
// such as the quotient of the divider, use the on-the-fly converter
// otf_step instead.)
module sd_to_bin
  import sd_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  sd_digit_t [W-1:0] sd,
  output logic      [W-1:0] bin
);
  logic [W-1:0] pos, neg;

  always_comb begin
    for (int i = 0; i < W; i++) begin
      pos[i] = sd[i].p;
      neg[i] = sd[i].n;
    end
    bin = pos - neg;
  end
endmodule
