// add_step2: second step of the SD addition, forming the sum digit.
//
// s_i = c_{i-1} - z_i, with c_{i-1} the transfer from the digit below and
// z_i the interim digit of this position. Since c has only a positive part
// and z only a negative part, the sum is always a valid digit:
//   s+ = ~z- & c+_{i-1}          (4.5)
//   s- = ~c+_{i-1} & z-          (4.6)
// Combinational; no carry leaves this step, so the addition is carry free.
module add_step2 (
  input  logic z_n,    // z_i-
  input  logic c_p,    // c_{i-1}+
  output logic s_p,    // s_i+
  output logic s_n     // s_i-
);
  always_comb begin
    s_p = ~z_n & c_p;
    s_n = ~c_p & z_n;
  end
endmodule
