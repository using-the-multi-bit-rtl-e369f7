// voltage_interpreter: behavioural (not synthesizable) model of the threshold
// read circuit of a multi-bit memristor cell.
//
// The intermediate-node voltage of the cell's divider is fed to a chain of
// diodes with a comparator at each tap; in effect the voltage is placed in
// one of three bands and exactly one of Out0, Out1, Out2 is high:
//   v_in <  TH_LO          -> Out0  (high resistance)
//   TH_LO <= v_in < TH_HI  -> Out1
//   v_in >= TH_HI          -> Out2  (low resistance)
// The band edges are set by the diode drops; their values here are this
// design's, chosen to separate the three programmed levels of
// memristor_cell at a 1.2 V read. Instantaneous (no comparator delay).
module voltage_interpreter #(
  parameter real TH_LO = 0.011,   // V
  parameter real TH_HI = 0.030    // V
) (
  input  real  v_in,
  output logic out0,
  output logic out1,
  output logic out2
);
  always_comb begin
    out0 = (v_in < TH_LO);
    out2 = (v_in >= TH_HI);
    out1 = !out0 && !out2;
  end
endmodule
