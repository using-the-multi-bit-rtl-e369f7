// sd_mem_system_tb: end-to-end test of the unit with its memristor crossbar,
// every parameter at its default.
//
// First every crossbar row is written with a random SD word (the analog
// cells are programmed pulse by pulse while the clocked unit waits). Then all
// units run at once on random traffic for NCYC clocks, as in the test of the
// arithmetic unit alone, and in addition:
//  * now and then a crossbar row is read (between two clock edges; the read
//    takes one time unit) and compared with the last word written there;
//  * now and then a row is rewritten while the clocked traffic goes on, and
//    always once it has been read XB_READ_LIMIT times (every read nudges the
//    cells' state, so a stored word only survives a limited number of reads);
//  * the add/sub row takes the word last read from the crossbar as its SD
//    operand on some cycles (as_ext), and the sum lands in the register file.
// Results are checked against models: register contents modulo 2^RW,
// products a*b, and A = Q*B + R with -B < R < B, with latency N.
// Each mechanism is counted and must occur at least once: add, subtract,
// load, a crossbar operand, a modulo wrap, multiplier rows adding B and 0,
// back-to-back issue, quotient digits 1, 0 and -1, a negative remainder,
// crossbar reads and writes, and clocked work during a crossbar write.
module sd_mem_system_tb;
  import sd_pkg::*;
  localparam int N = 8, DEPTH = 8, XB_ROWS = 4, RW = 2 * N, AW = 3, XAW = 2, NCYC = 4000;
  localparam int WATCHDOG = 200000;
  // A cell model drifts a little with every read; a row is rewritten after
  // this many reads, well before its digits could leave their bands.
  localparam int XB_READ_LIMIT = 20;

  logic clk = 1'b0, rst_n;
  logic as_valid, as_sub, as_load, as_ext;
  logic xb_we, xb_re, xb_busy, xb_err;
  logic [XAW-1:0] xb_waddr, xb_raddr;
  sd_digit_t [RW-1:0] xb_wdata, xb_rdata;
  sd_digit_t [RW-1:0] xb_model [XB_ROWS];
  sd_digit_t [RW-1:0] xb_last;
  int xb_reads [XB_ROWS];
  logic [AW-1:0] as_ra, as_rd, rd_addr;
  logic [RW-1:0] as_b, rd_bin, mul_p;
  sd_digit_t [RW-1:0] rd_sd, mul_p_sd;
  logic mul_in_valid, mul_out_valid, div_in_valid, div_out_valid;
  logic [N-1:0] mul_a, mul_b, div_a, div_b;
  sd_digit_t [N-1:0] div_q_sd;
  logic [N:0] div_q;
  logic [N+1:0] div_r;

  int checks = 0, failures = 0, cycle = 0;
  int n_add = 0, n_sub = 0, n_load = 0, n_ext = 0, n_wrap = 0, n_row_add = 0, n_row_zero = 0;
  int n_xw = 0, n_xr = 0, n_overlap = 0, n_refresh = 0;
  int n_b2b = 0, n_qpos = 0, n_qzero = 0, n_qneg = 0, n_rneg = 0;

  longint rf_model [DEPTH];
  longint mul_exp [$];
  int     mul_c [$];
  longint div_ea [$], div_eb [$];
  int     div_c [$];
  logic   last_mul_v = 1'b0;

  sd_mem_system dut (
    .clk(clk), .rst_n(rst_n),
    .as_valid(as_valid), .as_sub(as_sub), .as_load(as_load), .as_ra(as_ra), .as_rd(as_rd),
    .as_b(as_b), .as_ext(as_ext), .rd_addr(rd_addr), .rd_sd(rd_sd), .rd_bin(rd_bin),
    .mul_in_valid(mul_in_valid), .mul_a(mul_a), .mul_b(mul_b),
    .mul_out_valid(mul_out_valid), .mul_p_sd(mul_p_sd), .mul_p(mul_p),
    .div_in_valid(div_in_valid), .div_a(div_a), .div_b(div_b),
    .div_out_valid(div_out_valid), .div_q_sd(div_q_sd), .div_q(div_q), .div_r(div_r),
    .xb_we(xb_we), .xb_waddr(xb_waddr), .xb_wdata(xb_wdata), .xb_re(xb_re), .xb_raddr(xb_raddr),
    .xb_rdata(xb_rdata), .xb_busy(xb_busy), .xb_err(xb_err));

  always #5 clk = ~clk;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sd_val(input sd_digit_t [RW-1:0] v);
    longint s = 0;
    for (int i = 0; i < RW; i++) s += (longint'(v[i].p) - longint'(v[i].n)) <<< i;
    return s;
  endfunction

  function automatic sd_digit_t rand_digit();
    case ($urandom_range(2))
      0: return SD_NEG;
      1: return SD_ZERO;
      default: return SD_POS;
    endcase
  endfunction

  // Start writing a random word to crossbar row r; the write then runs on
  // its own while the clock goes on. No read is started before it ends.
  task automatic xb_write(input int r);
    sd_digit_t [RW-1:0] w;
    for (int i = 0; i < RW; i++) w[i] = rand_digit();
    xb_waddr = XAW'(r);
    xb_wdata = w;
    xb_we = 1'b1;
    #1;
    xb_we = 1'b0;
    xb_model[r] = w;
    xb_reads[r] = 0;
    n_xw++;
  endtask

  // Read crossbar row r between two clock edges and check the word.
  task automatic xb_read(input int r);
    xb_raddr = XAW'(r);
    xb_re = 1'b1;
    #1;
    xb_re = 1'b0;
    wait (!xb_busy);
    xb_last = xb_rdata;
    xb_reads[r]++;
    n_xr++;
    checks++;
    if (xb_rdata !== xb_model[r]) begin
      failures++;
      if (failures < 10) $display("FAIL crossbar row %0d read %h want %h", r, xb_rdata, xb_model[r]);
    end
  endtask

  // Scoreboards, sampled on the clock edge.
  always @(posedge clk) begin
    longint ea, eb, qv, rv, pv, nv;
    if (rst_n) begin
      // Register file read port.
      checks++;
      if (rd_bin !== RW'(rf_model[rd_addr]) || RW'(sd_val(rd_sd)) !== RW'(rf_model[rd_addr])) begin
        failures++;
        if (failures < 10) $display("FAIL rf[%0d] = %0d want %0d", rd_addr, rd_bin, rf_model[rd_addr]);
      end
      // Add/sub write.
      if (as_valid) begin
        pv = as_load ? 0 : (as_ext ? sd_val(xb_last) : rf_model[as_ra]);
        nv = as_sub ? pv - longint'(as_b) : pv + longint'(as_b);
        if (as_load) n_load++;
        else if (as_ext) n_ext++;
        if (xb_busy) n_overlap++;
        if (as_sub) n_sub++; else n_add++;
        if (nv < 0 || nv >= (longint'(1) <<< RW)) n_wrap++;
        rf_model[as_rd] = nv & ((longint'(1) <<< RW) - 1);
      end
      // Multiplier.
      if (mul_in_valid) begin
        mul_exp.push_back(longint'(mul_a) * longint'(mul_b));
        mul_c.push_back(cycle);
        for (int i = 0; i < N; i++) if (mul_a[i]) n_row_add++; else n_row_zero++;
        if (last_mul_v) n_b2b++;
      end
      last_mul_v = mul_in_valid;
      if (mul_out_valid) begin
        checks++;
        if (mul_exp.size() == 0) begin
          failures++;
          $display("FAIL product without operation");
        end else begin
          ea = mul_exp.pop_front();
          eb = longint'(mul_c.pop_front());
          if (mul_p !== RW'(ea) || RW'(sd_val(mul_p_sd)) !== RW'(ea) || cycle - eb != N) begin
            failures++;
            if (failures < 10) $display("FAIL product %0d want %0d latency %0d", mul_p, ea, cycle - eb);
          end
        end
      end
      // Divider.
      if (div_in_valid) begin
        div_ea.push_back(longint'(div_a));
        div_eb.push_back(longint'(div_b));
        div_c.push_back(cycle);
      end
      if (div_out_valid) begin
        checks++;
        if (div_ea.size() == 0) begin
          failures++;
          $display("FAIL quotient without operation");
        end else begin
          ea = div_ea.pop_front();
          eb = div_eb.pop_front();
          pv = longint'(div_c.pop_front());
          qv = 0;
          for (int i = 0; i < N; i++) begin
            qv += (longint'(div_q_sd[i].p) - longint'(div_q_sd[i].n)) <<< i;
            if (div_q_sd[i].p) n_qpos++;
            else if (div_q_sd[i].n) n_qneg++;
            else n_qzero++;
          end
          rv = longint'($signed(div_r));
          if (rv < 0) n_rneg++;
          if (longint'($signed(div_q)) != qv || ea != qv * eb + rv || !(rv > -eb && rv < eb) ||
              cycle - pv != N) begin
            failures++;
            if (failures < 10)
              $display("FAIL %0d / %0d: q=%0d r=%0d latency %0d", ea, eb, qv, rv, cycle - pv);
          end
        end
      end
    end
    cycle++;
  end

  initial begin
    rst_n = 1'b0;
    as_valid = 1'b0; as_sub = 1'b0; as_load = 1'b0; as_ext = 1'b0; as_ra = '0; as_rd = '0; as_b = '0;
    rd_addr = '0;
    mul_in_valid = 1'b0; mul_a = '0; mul_b = '0;
    div_in_valid = 1'b0; div_a = '0; div_b = 1;
    for (int r = 0; r < DEPTH; r++) rf_model[r] = 0;
    for (int r = 0; r < XB_ROWS; r++) xb_reads[r] = 0;
    xb_we = 1'b0; xb_re = 1'b0; xb_waddr = '0; xb_raddr = '0; xb_wdata = '0; xb_last = '0;
    repeat (3) @(posedge clk);
    // Fill the crossbar, then read every row back.
    for (int r = 0; r < XB_ROWS; r++) begin
      xb_write(r);
      wait (!xb_busy);
    end
    @(posedge clk);
    #1;
    for (int r = 0; r < XB_ROWS; r++) xb_read(r);
    @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < NCYC; c++) begin
      as_valid = ($urandom_range(3) != 0);
      as_sub   = 1'($urandom);
      as_load  = ($urandom_range(9) == 0);
      if (!xb_busy && $urandom_range(9) == 0) begin
        int r;
        r = $urandom_range(XB_ROWS - 1);
        if (xb_reads[r] >= XB_READ_LIMIT) begin
          n_refresh++;
          xb_write(r);
        end else if ($urandom_range(29) == 0) xb_write(r);
        else xb_read(r);
      end
      as_ext   = ($urandom_range(9) == 0);
      as_ra    = AW'($urandom);
      as_rd    = AW'($urandom);
      as_b     = ($urandom_range(3) == 0) ? RW'($urandom) : RW'($urandom_range(255));
      rd_addr  = AW'($urandom);
      mul_in_valid = ($urandom_range(7) != 0);
      mul_a = N'($urandom);
      mul_b = N'($urandom);
      div_in_valid = ($urandom_range(7) != 0);
      div_a = N'($urandom);
      div_b = N'($urandom) >> $urandom_range(N - 1);
      if (div_b == 0) div_b = 1;
      @(posedge clk);
      #1;
    end
    as_valid = 1'b0; mul_in_valid = 1'b0; div_in_valid = 1'b0;
    wait (!xb_busy);
    #1;
    for (int r = 0; r < XB_ROWS; r++) xb_read(r);
    checks++;
    if (xb_err) begin failures++; $display("FAIL crossbar reports a digit that did not program"); end
    repeat (N + 3) @(posedge clk);
    #1;
    checks++;
    if (mul_exp.size() != 0 || div_ea.size() != 0) begin
      failures++;
      $display("FAIL results missing: %0d products, %0d quotients", mul_exp.size(), div_ea.size());
    end
    $display("mechanisms: add %0d sub %0d load %0d external_operand %0d wrap %0d row_add %0d row_zero %0d back_to_back %0d",
             n_add, n_sub, n_load, n_ext, n_wrap, n_row_add, n_row_zero, n_b2b);
    $display("            q=+1 %0d q=0 %0d q=-1 %0d negative_remainder %0d",
             n_qpos, n_qzero, n_qneg, n_rneg);
    $display("            crossbar writes %0d (rewrites after %0d reads: %0d) reads %0d operations during a write %0d",
             n_xw, XB_READ_LIMIT, n_refresh, n_xr, n_overlap);
    checks++;
    if (n_add == 0 || n_sub == 0 || n_load == 0 || n_ext == 0 || n_wrap == 0 || n_row_add == 0 ||
        n_row_zero == 0 || n_b2b == 0 || n_qpos == 0 || n_qzero == 0 || n_qneg == 0 ||
        n_rneg == 0 || n_xw == 0 || n_xr == 0 || n_overlap == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
