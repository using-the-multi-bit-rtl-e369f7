// sd_div_pipeline_tb: streaming check of the pipelined SD divider.
// Random A and B > 0 enter on back-to-back clocks. Each result must appear
// N clocks later, in order, with
//   A = Q*B + R,  -B < R < B,  R = value(r_sd) / 2^N (exactly divisible),
// the two's complement quotient equal to the value of the SD digits, and
// every quotient digit valid. All three digit values must occur.
module sd_div_pipeline_tb;
  import sd_pkg::*;
  localparam int N = 8, W = 2 * N + 2, NOPS = 2000;
  logic clk = 1'b0, rst_n, in_valid, out_valid;
  logic [N-1:0] a, b;
  sd_digit_t [N-1:0] q_sd;
  logic [N:0] q;
  sd_digit_t [W-1:0] r_sd;
  int checks = 0, failures = 0;
  int cycle = 0, sent = 0, got = 0;
  int n_pos = 0, n_neg = 0, n_zero = 0;
  longint exp_a [NOPS], exp_b [NOPS];
  int     exp_c [NOPS];

  sd_div_pipeline #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
                                .out_valid(out_valid), .q_sd(q_sd), .q(q), .r_sd(r_sd));

  always #5 clk = ~clk;

  initial begin
    repeat (NOPS * 3 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    longint qv, rv, qbin, av, bv;
    logic bad;
    if (rst_n && out_valid) begin
      qv = 0; rv = 0; bad = 1'b0;
      for (int i = 0; i < N; i++) begin
        qv += (longint'(q_sd[i].p) - longint'(q_sd[i].n)) <<< i;
        if (q_sd[i].p && q_sd[i].n) bad = 1'b1;
        if (q_sd[i].p) n_pos++;
        else if (q_sd[i].n) n_neg++;
        else n_zero++;
      end
      for (int i = 0; i < W; i++) rv += (longint'(r_sd[i].p) - longint'(r_sd[i].n)) <<< i;
      qbin = longint'($signed(q));
      av = (got < NOPS) ? exp_a[got] : 0;
      bv = (got < NOPS) ? exp_b[got] : 1;
      checks++;
      if (got >= NOPS || bad || qbin != qv || (rv % (longint'(1) <<< N)) != 0 ||
          av != qv * bv + (rv >>> N) || !((rv >>> N) > -bv && (rv >>> N) < bv) ||
          cycle + 1 - exp_c[got] != N) begin
        failures++;
        if (failures < 10)
          $display("FAIL op %0d: %0d / %0d -> q=%0d (bin %0d) r=%0d latency %0d",
                   got, av, bv, qv, qbin, rv >>> N, cycle + 1 - exp_c[got]);
      end
      got++;
    end
    cycle++;
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; a = '0; b = 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    while (sent < NOPS) begin
      in_valid = ($urandom_range(9) != 0);
      case (sent)
        0: begin a = '0; b = 1;  end
        1: begin a = '1; b = 1;  end
        2: begin a = '1; b = '1; end
        3: begin a = 1;  b = '1; end
        default: begin
          a = N'($urandom);
          b = N'($urandom);
          if ($urandom_range(3) == 0) b = b >> $urandom_range(N - 1);
          if (b == 0) b = 1;
        end
      endcase
      @(posedge clk);
      #1;
      if (in_valid) begin
        exp_a[sent] = longint'(a);
        exp_b[sent] = longint'(b);
        exp_c[sent] = cycle;
        sent++;
      end
    end
    in_valid = 1'b0;
    repeat (N + 3) @(posedge clk);
    checks++;
    if (got != NOPS || n_pos == 0 || n_neg == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL %0d results for %0d operations; digits +%0d 0:%0d -%0d",
               got, NOPS, n_pos, n_zero, n_neg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
