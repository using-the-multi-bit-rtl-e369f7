// memristor_cell_tb: the analog cell model and its threshold read together.
// A program-and-verify loop writes each of the three levels in turn: read at
// 1.2 V, and while the wrong line is high apply a +/-1.2 V pulse in the
// direction of the wanted level. Checks: each level is reached within a
// bounded number of pulses; exactly one read line is high; the state holds
// with no voltage applied; R follows R_ON*x + R_OFF*(1-x); a 1.2 V, 1 Hz
// sine (1000 steps per period) gives a pinched hysteresis loop, i.e. a
// different current at the same voltage on the rising and falling slope.
module memristor_cell_tb;
  real v_p = 0.0, v_node, i_mem, r_mem, x_state;
  logic out0, out1, out2;
  int checks = 0, failures = 0;
  localparam real VRD = 1.2;

  memristor_cell dut (.v_p(v_p), .v_node(v_node), .i_mem(i_mem), .r_mem(r_mem), .x_state(x_state));
  voltage_interpreter u_vi (.v_in(v_node), .out0(out0), .out1(out1), .out2(out2));

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Read: apply the read voltage for one step, return {Out2, Out1, Out0}.
  task automatic read_cell(output logic [2:0] outs);
    v_p = VRD;
    #0.5;
    outs = {out2, out1, out0};
    #0.5;
    v_p = 0.0;
  endtask

  task automatic program_cell(input int lvl, output int pulses);
    logic [2:0] outs;
    pulses = 0;
    read_cell(outs);
    while (outs != (3'b001 << lvl) && pulses < 500) begin
      // Lower levels sit at higher resistance (smaller x): drive down.
      if (lvl == 2 || (lvl == 1 && outs == 3'b001)) v_p = VRD;
      else v_p = -VRD;
      #20;
      v_p = 0.0;
      pulses++;
      read_cell(outs);
    end
  endtask

  initial begin
    logic [2:0] outs;
    int pulses;
    int seq [6] = '{2, 0, 1, 0, 2, 1};
    real x0, i_rise, i_fall;
    #1;
    read_cell(outs);
    checks++;
    if (outs != 3'b010) begin failures++; $display("FAIL initial read %b", outs); end
    for (int k = 0; k < 6; k++) begin
      program_cell(seq[k], pulses);
      read_cell(outs);
      checks++;
      if (outs != (3'b001 << seq[k]) || pulses >= 500) begin
        failures++;
        $display("FAIL level %0d: read %b after %0d pulses", seq[k], outs, pulses);
      end
      // Retention with no drive.
      x0 = x_state;
      #1000;
      read_cell(outs);
      checks++;
      if (outs != (3'b001 << seq[k]) || (x_state - x0) > 0.01 || (x0 - x_state) > 0.01) begin
        failures++;
        $display("FAIL retention level %0d", seq[k]);
      end
      checks++;
      if ((r_mem - (100.0 * x_state + 16000.0 * (1.0 - x_state))) > 1.0e-6 ||
          (r_mem - (100.0 * x_state + 16000.0 * (1.0 - x_state))) < -1.0e-6) begin
        failures++;
        $display("FAIL resistance %f at x=%f", r_mem, x_state);
      end
    end
    // Pinched hysteresis: rising slope at 30 degrees, falling at 150 degrees.
    i_rise = 0.0; i_fall = 0.0;
    for (int t = 0; t < 1000; t++) begin
      v_p = VRD * $sin(2.0 * 3.14159265358979 * real'(t) / 1000.0);
      #0.5;
      if (t == 83)  i_rise = i_mem;
      if (t == 417) i_fall = i_mem;
      #0.5;
    end
    v_p = 0.0;
    checks++;
    if (!(i_fall > 1.05 * i_rise) || !(i_rise > 0.0)) begin
      failures++;
      $display("FAIL no hysteresis: rising %g A, falling %g A", i_rise, i_fall);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
