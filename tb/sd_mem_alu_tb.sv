// sd_mem_alu_tb: end-to-end test of the SD arithmetic unit at its default size.
//
// All three units run at once on random traffic for NCYC clocks:
//  * add/sub on the memristor register file: a model keeps every register
//    modulo 2^RW; each cycle a random register is read back through the
//    second port and compared as two's complement and as SD digits.
//  * multiplier and divider: operations are issued on most cycles; results
//    are checked in order, with the latency of N clocks, against a*b and
//    against A = Q*B + R, -B < R < B.
// Each mechanism of the design is counted and must occur at least once:
// add, subtract (the exchange path), load, an external SD operand, a register value wrapping
// modulo 2^RW, a multiplier row adding B and one adding 0, back-to-back
// issue, quotient digits 1, 0 and -1, and a negative final remainder.
module sd_mem_alu_tb;
  import sd_pkg::*;
  localparam int N = 8, DEPTH = 8, RW = 2 * N, AW = 3, NCYC = 4000;

  logic clk = 1'b0, rst_n;
  logic as_valid, as_sub, as_load, as_ext;
  sd_digit_t [RW-1:0] as_ext_a;
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
  int n_b2b = 0, n_qpos = 0, n_qzero = 0, n_qneg = 0, n_rneg = 0;

  longint rf_model [DEPTH];
  longint mul_exp [$];
  int     mul_c [$];
  longint div_ea [$], div_eb [$];
  int     div_c [$];
  logic   last_mul_v = 1'b0;

  sd_mem_alu dut (
    .clk(clk), .rst_n(rst_n),
    .as_valid(as_valid), .as_sub(as_sub), .as_load(as_load), .as_ra(as_ra), .as_rd(as_rd),
    .as_b(as_b), .as_ext(as_ext), .as_ext_a(as_ext_a), .rd_addr(rd_addr), .rd_sd(rd_sd), .rd_bin(rd_bin),
    .mul_in_valid(mul_in_valid), .mul_a(mul_a), .mul_b(mul_b),
    .mul_out_valid(mul_out_valid), .mul_p_sd(mul_p_sd), .mul_p(mul_p),
    .div_in_valid(div_in_valid), .div_a(div_a), .div_b(div_b),
    .div_out_valid(div_out_valid), .div_q_sd(div_q_sd), .div_q(div_q), .div_r(div_r));

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sd_val(input sd_digit_t [RW-1:0] v);
    longint s = 0;
    for (int i = 0; i < RW; i++) s += (longint'(v[i].p) - longint'(v[i].n)) <<< i;
    return s;
  endfunction

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
        pv = as_load ? 0 : (as_ext ? sd_val(as_ext_a) : rf_model[as_ra]);
        nv = as_sub ? pv - longint'(as_b) : pv + longint'(as_b);
        if (as_load) n_load++;
        else if (as_ext) n_ext++;
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
    as_valid = 1'b0; as_sub = 1'b0; as_load = 1'b0; as_ext = 1'b0; as_ext_a = '0; as_ra = '0; as_rd = '0; as_b = '0;
    rd_addr = '0;
    mul_in_valid = 1'b0; mul_a = '0; mul_b = '0;
    div_in_valid = 1'b0; div_a = '0; div_b = 1;
    for (int r = 0; r < DEPTH; r++) rf_model[r] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < NCYC; c++) begin
      as_valid = ($urandom_range(3) != 0);
      as_sub   = 1'($urandom);
      as_load  = ($urandom_range(9) == 0);
      as_ext   = ($urandom_range(9) == 0);
      for (int i = 0; i < RW; i++)
        case ($urandom_range(2))
          0: as_ext_a[i] = SD_NEG;
          1: as_ext_a[i] = SD_ZERO;
          default: as_ext_a[i] = SD_POS;
        endcase
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
    checks++;
    if (n_add == 0 || n_sub == 0 || n_load == 0 || n_ext == 0 || n_wrap == 0 || n_row_add == 0 ||
        n_row_zero == 0 || n_b2b == 0 || n_qpos == 0 || n_qzero == 0 || n_qneg == 0 ||
        n_rneg == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
