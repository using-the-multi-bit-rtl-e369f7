// add_step1: first step of adding a binary digit B to an SD digit a.
//
// a + B lies in {-1, 0, 1, 2} and is rewritten as 2*c - z with a transfer
// c in {0, 1} (only a positive part) and an interim digit z in {0, 1} (only
// a negative part):
//   c+ = a+ | (B & ~a-)          (4.3)
//   z- = (a+ | a-) ^ B           (4.4)
// c+ goes to the next higher digit position, z- stays. Combinational.
module add_step1 (
  input  logic a_p,   // a_i+
  input  logic a_n,   // a_i-
  input  logic b,     // B_i
  output logic c_p,   // c_i+
  output logic z_n    // z_i-
);
  always_comb begin
    c_p = a_p | (b & ~a_n);
    z_n = (a_p | a_n) ^ b;
  end
endmodule
