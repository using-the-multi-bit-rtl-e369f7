// voltage_interpreter_tb: sweep of the threshold read from 0 to 0.1 V.
// Exactly one line must be high, Out0 below 11 mV, Out2 from 30 mV up,
// Out1 in between.
module voltage_interpreter_tb;
  real v = 0.0;
  logic out0, out1, out2;
  int checks = 0, failures = 0;

  voltage_interpreter dut (.v_in(v), .out0(out0), .out1(out1), .out2(out2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] want;
    for (int k = 0; k <= 1000; k++) begin
      v = real'(k) * 1.0e-4;
      #1;
      if (v < 0.011) want = 3'b001;
      else if (v >= 0.030) want = 3'b100;
      else want = 3'b010;
      checks++;
      if ({out2, out1, out0} != want) begin
        failures++;
        if (failures < 10) $display("FAIL v=%f got %b%b%b", v, out2, out1, out0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
