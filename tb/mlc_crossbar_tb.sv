// mlc_crossbar_tb: SD words stored in the analog memristor array model.
// Random words are written to every row (each write waits for busy to
// fall), then overwritten in a random order; every row is read back
// several times and compared with a model. Checks: read-back equals the
// last word written, repeated reads agree (no read disturb visible),
// err stays low, and write and read report busy while they run.
module mlc_crossbar_tb;
  import sd_pkg::*;
  localparam int ROWS = 4, COLS = 8, AW = 2;
  logic we = 1'b0, re = 1'b0, busy, err;
  logic [AW-1:0] waddr = '0, raddr = '0;
  sd_digit_t [COLS-1:0] wdata = '0, rdata;
  sd_digit_t [COLS-1:0] model [ROWS];
  int checks = 0, failures = 0;

  mlc_crossbar #(.ROWS(ROWS), .COLS(COLS)) dut (
    .we(we), .waddr(waddr), .wdata(wdata), .re(re), .raddr(raddr),
    .rdata(rdata), .busy(busy), .err(err));

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sd_digit_t rand_digit();
    case ($urandom_range(2))
      0: return SD_NEG;
      1: return SD_ZERO;
      default: return SD_POS;
    endcase
  endfunction

  task automatic write_word(input int row, input sd_digit_t [COLS-1:0] w);
    waddr = AW'(row);
    wdata = w;
    we = 1'b1;
    #0.1;
    checks++;
    if (!busy) begin failures++; $display("FAIL write not busy"); end
    we = 1'b0;
    wait (!busy);
    #1;
    model[row] = w;
  endtask

  task automatic read_word(input int row, output sd_digit_t [COLS-1:0] w);
    raddr = AW'(row);
    re = 1'b1;
    #0.1;
    re = 1'b0;
    wait (!busy);
    #1;
    w = rdata;
  endtask

  initial begin
    sd_digit_t [COLS-1:0] w, r1;
    #1;
    // Cells start in the middle level: every word reads as 0.
    for (int row = 0; row < ROWS; row++) begin
      read_word(row, r1);
      checks++;
      if (r1 !== '0) begin failures++; $display("FAIL initial row %0d", row); end
    end
    for (int pass = 0; pass < 10; pass++) begin
      for (int k = 0; k < ROWS; k++) begin
        int row;
        row = (pass == 0) ? k : $urandom_range(ROWS - 1);
        for (int c = 0; c < COLS; c++) w[c] = rand_digit();
        write_word(row, w);
      end
      for (int row = 0; row < ROWS; row++) begin
        for (int rep = 0; rep < 8; rep++) begin
          read_word(row, r1);
          checks++;
          if (r1 !== model[row]) begin
            failures++;
            if (failures < 10) $display("FAIL pass %0d row %0d read %h want %h", pass, row, r1, model[row]);
          end
        end
      end
    end
    checks++;
    if (err) begin failures++; $display("FAIL err set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
