// sd_mul_pipeline_tb: streaming check of the pipelined SD multiplier.
// Operands enter on back-to-back clocks (with some idle gaps); each product
// must appear exactly N clocks after its operands, in order, and equal a*b
// after conversion, and the SD digit vector must equal it modulo 2^(2N)
// (the partial sum is kept modulo 2^(2N)). Corner operands
// (0, 1, all ones) come first.
module sd_mul_pipeline_tb;
  import sd_pkg::*;
  localparam int N = 8, PW = 2 * N, NOPS = 2000;
  logic clk = 1'b0, rst_n, in_valid, out_valid;
  logic [N-1:0] a, b;
  sd_digit_t [PW-1:0] p_sd;
  logic [PW-1:0] p;
  int checks = 0, failures = 0;
  int cycle = 0, sent = 0, got = 0;
  longint exp_p [NOPS];
  int     exp_c [NOPS];

  sd_mul_pipeline #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
                                .out_valid(out_valid), .p_sd(p_sd), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (NOPS * 3 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sd_val();
    longint v = 0;
    for (int i = 0; i < PW; i++) v += (longint'(p_sd[i].p) - longint'(p_sd[i].n)) <<< i;
    return v;
  endfunction

  // Output side: compare in order, check latency.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (got >= NOPS || p !== PW'(exp_p[got]) || PW'(sd_val()) !== PW'(exp_p[got]) ||
          cycle + 1 - exp_c[got] != N) begin
        failures++;
        if (failures < 10)
          $display("FAIL op %0d: p=%0d sd=%0d want %0d latency %0d", got, p, sd_val(),
                   exp_p[got], cycle + 1 - exp_c[got]);
      end
      got++;
    end
    cycle++;
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    while (sent < NOPS) begin
      in_valid = ($urandom_range(9) != 0);
      case (sent)
        0: begin a = '0; b = '1; end
        1: begin a = '1; b = '1; end
        2: begin a = 1;  b = '1; end
        3: begin a = '1; b = 1;  end
        default: begin a = N'($urandom); b = N'($urandom); end
      endcase
      @(posedge clk);
      #1;
      if (in_valid) begin
        exp_p[sent] = longint'(a) * longint'(b);
        exp_c[sent] = cycle;
        sent++;
      end
    end
    in_valid = 1'b0;
    repeat (N + 3) @(posedge clk);
    checks++;
    if (got != NOPS) begin
      failures++;
      $display("FAIL %0d results for %0d operations", got, NOPS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
