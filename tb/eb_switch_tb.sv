// eb_switch_tb: exhaustive check of the exchange/bypass switch.
// All eight input combinations; bypass must keep the order, exchange swap it.
module eb_switch_tb;
  logic ex, in1, in2, out1, out2;
  int checks = 0, failures = 0;

  eb_switch dut (.ex(ex), .in1(in1), .in2(in2), .out1(out1), .out2(out2));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {ex, in1, in2} = 3'(v);
      #1;
      checks++;
      if (ex ? (out1 !== in2 || out2 !== in1) : (out1 !== in1 || out2 !== in2)) begin
        failures++;
        $display("FAIL ex=%0b in=%0b%0b out=%0b%0b", ex, in1, in2, out1, out2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
