// eb_switch: exchange/bypass switch for one signed digit.
//
// Negating an SD digit only swaps its positive and negative parts. With
// ex = 0 the switch bypasses (out1 = in1, out2 = in2); with ex = 1 it
// exchanges the two (out1 = in2, out2 = in1). The digit processor cell uses
// one at its input and one at its output, both driven by add/sub, so that
// a - B is formed as -((-a) + B). Purely combinational.
module eb_switch (
  input  logic ex,    // 0: bypass, 1: exchange
  input  logic in1,
  input  logic in2,
  output logic out1,
  output logic out2
);
  always_comb begin
    out1 = ex ? in2 : in1;
    out2 = ex ? in1 : in2;
  end
endmodule
