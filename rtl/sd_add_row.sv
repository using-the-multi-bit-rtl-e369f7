// sd_add_row: a row of W digit processor cells, an SD +/- binary adder.
//
// Computes s = a + B (sub = 0) or s = a - B (sub = 1) where a is a W-digit
// SD number and B a W-bit unsigned binary number. Each cell takes the
// transfer c+ of its right-hand neighbour; the lowest cell gets 0. The
// transfer out of the top cell becomes the extra digit s[W] (negated when
// subtracting, like every other sum digit), so the result is exact with
// W+1 digits. zero_n = 0 makes the row add 0. The delay is that of one cell
// whatever W is: no carry ripples further than one position.
module sd_add_row
  import sd_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic                 sub,
  input  logic                 zero_n,
  input  sd_digit_t [W-1:0]    a,
  input  logic      [W-1:0]    b,
  output sd_digit_t [W:0]      s,
  output logic      [W-1:0]    b_out
);
  logic [W:0] c;   // c[i] is the transfer into digit i

  assign c[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_cell
    sd_digit_cell u_cell (
      .sub    (sub),
      .zero_n (zero_n),
      .a      (a[i]),
      .b      (b[i]),
      .c_in_p (c[i]),
      .c_out_p(c[i+1]),
      .s      (s[i]),
      .b_out  (b_out[i])
    );
  end

  // Top digit: the transfer out of the row, through the same exchange as
  // the other sum digits.
  eb_switch u_sw_top (.ex(sub), .in1(c[W]), .in2(1'b0), .out1(s[W].p), .out2(s[W].n));
endmodule
