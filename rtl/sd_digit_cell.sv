// sd_digit_cell: digit processor cell of the SD adder/subtractor.
//
// Adds (sub = 0) or subtracts (sub = 1) the binary digit B to/from the SD
// digit a. Subtraction uses a - B = -((-a) + B): an input exchange/bypass
// switch negates a, add_step1 and add_step2 add B, and an output switch
// negates the sum digit. zero_n = 0 forces the binary digit to 0 through an
// AND gate, so the cell passes a through unchanged (the "add 0" case of
// multiplication and division). B is also passed on to the row below.
//
// The transfer c+ goes to the cell one digit position up; c_in_p comes from
// the cell one position down. The structure (two switches, AND, two add
// steps, B feed-through) follows the cell schematic of the design.
// Combinational.
module sd_digit_cell
  import sd_pkg::*;
(
  input  logic      sub,      // add/sub control: 0 add, 1 subtract
  input  logic      zero_n,   // 0: treat B as 0
  input  sd_digit_t a,        // SD operand digit a_i
  input  logic      b,        // binary operand digit B_i
  input  logic      c_in_p,   // c_{i-1}+ from the lower neighbour
  output logic      c_out_p,  // c_i+ to the upper neighbour
  output sd_digit_t s,        // sum digit s_i
  output logic      b_out     // B_i passed on
);
  logic ap, an, bg, zn, sp, sn;

  eb_switch u_sw_in (.ex(sub), .in1(a.p), .in2(a.n), .out1(ap), .out2(an));

  always_comb bg = b & zero_n;

  add_step1 u_step1 (.a_p(ap), .a_n(an), .b(bg), .c_p(c_out_p), .z_n(zn));
  add_step2 u_step2 (.z_n(zn), .c_p(c_in_p), .s_p(sp), .s_n(sn));

  eb_switch u_sw_out (.ex(sub), .in1(sp), .in2(sn), .out1(s.p), .out2(s.n));

  always_comb b_out = b;
endmodule
