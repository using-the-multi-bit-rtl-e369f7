// mlc_crossbar: behavioural (not synthesizable) model of a small multi-bit
// memristor memory holding SD words, one three-level cell per digit.
//
// ROWS x COLS memristor_cell models, each with its own voltage_interpreter,
// stand for the crossbar of the register file: row r holds one COLS-digit SD
// word. Sneak paths and line resistance are not modelled; each cell is
// driven and read on its own, as through an ideal selector.
//
// Write (we pulse with waddr, wdata while busy = 0): every digit of the
// selected row is programmed by program-and-verify. The cell is read at
// V_READ; while the wrong line is high, a V_PROG pulse of PULSE time units,
// positive towards a lower resistance (higher level) and negative towards a
// higher one, is applied, and the cell is read again. The middle level is
// always approached from below (the cell is first taken down to the lowest
// level, since pulses grow stronger as the resistance falls), and EXTRA further pulses push the cell away
// from the band edge it has just crossed: a read at V_READ itself moves the
// state slightly towards lower resistance, so a cell left at an edge would
// drift into the next level after a few reads. busy stays high until every
// digit of the word is written; err is set if a digit does not read back
// correctly. Requests raised while busy is high are ignored.
// Read (re pulse with raddr while busy = 0): V_READ is applied to the row
// for one time unit and the interpreters' one-hot lines, decoded as
// Out0 = -1, Out1 = 0, Out2 = +1, appear on rdata; busy is high meanwhile.
// Both operations are sequenced by the model itself in simulation time, not
// by a clock. Sizes, pulse lengths and the handshake are this design's.
module mlc_crossbar
  import sd_pkg::*;
#(
  parameter int  ROWS       = 4,
  parameter int  COLS       = 8,
  parameter real V_READ     = 1.2,
  parameter real V_PROG     = 1.2,
  parameter int  PULSE      = 20,
  parameter int  MAX_PULSES = 500,
  parameter int  EXTRA      = 5,
  localparam int AW         = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic                 we,
  input  logic      [AW-1:0]   waddr,
  input  sd_digit_t [COLS-1:0] wdata,
  input  logic                 re,
  input  logic      [AW-1:0]   raddr,
  output sd_digit_t [COLS-1:0] rdata,
  output logic                 busy,
  output logic                 err
);
  real  vp      [ROWS][COLS];
  real  vnode   [ROWS][COLS];
  real  imem    [ROWS][COLS];
  real  rmem    [ROWS][COLS];
  real  xst     [ROWS][COLS];
  logic o0      [ROWS][COLS];
  logic o1      [ROWS][COLS];
  logic o2      [ROWS][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      memristor_cell u_cell (
        .v_p(vp[r][c]), .v_node(vnode[r][c]), .i_mem(imem[r][c]),
        .r_mem(rmem[r][c]), .x_state(xst[r][c])
      );
      voltage_interpreter u_vi (
        .v_in(vnode[r][c]), .out0(o0[r][c]), .out1(o1[r][c]), .out2(o2[r][c])
      );
    end
  end

  function automatic logic [2:0] outs_of(int r, int c);
    return {o2[r][c], o1[r][c], o0[r][c]};
  endfunction

  // Read one cell: apply V_READ for one time unit, sample in the middle.
  task automatic read_cell(input int r, input int c, output logic [2:0] outs);
    vp[r][c] = V_READ;
    #0.5;
    outs = outs_of(r, c);
    #0.5;
    vp[r][c] = 0.0;
  endtask

  // One pulse of PULSE time units at +/-V_PROG, then a verify read.
  task automatic pulse_cell(input int r, input int c, input logic up, output logic [2:0] outs);
    vp[r][c] = up ? V_PROG : -V_PROG;
    #(PULSE);
    vp[r][c] = 0.0;
    read_cell(r, c, outs);
  endtask

  task automatic program_cell(input int r, input int c, input mlc_level_t lvl);
    logic [2:0] want, outs;
    logic up;
    int pulses;
    want = read_of_level(lvl);
    pulses = 0;
    read_cell(r, c, outs);
    // The middle level is always approached from below: first go down to
    // the lowest level, wherever in the middle or upper band the cell sits.
    if (want == 3'b010 && outs != 3'b001)
      while (outs != 3'b001 && pulses < MAX_PULSES) begin
        pulse_cell(r, c, 1'b0, outs);
        pulses++;
      end
    up = (want != 3'b001);
    while (outs != want && pulses < MAX_PULSES) begin
      pulse_cell(r, c, up, outs);
      pulses++;
    end
    // Move EXTRA pulses further into the band, away from the edge just
    // crossed, so that read disturb (every read pushes x up) stays harmless.
    for (int k = 0; k < EXTRA; k++) pulse_cell(r, c, up, outs);
    if (outs != want) err = 1'b1;
  endtask

  // One process sequences everything; a write request wins over a read
  // request raised at the same moment.
  initial begin
    int         row;
    sd_digit_t [COLS-1:0] word;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) vp[r][c] = 0.0;
    busy  = 1'b0;
    err   = 1'b0;
    rdata = '0;
    forever begin
      @(posedge we or posedge re);
      busy = 1'b1;
      if (we) begin
        row  = int'(waddr);
        word = wdata;
        if (row < ROWS)
          for (int c = 0; c < COLS; c++) program_cell(row, c, level_of(word[c]));
      end else begin
        row = int'(raddr);
        if (row < ROWS) begin
          for (int c = 0; c < COLS; c++) vp[row][c] = V_READ;
          #0.5;
          for (int c = 0; c < COLS; c++) rdata[c] = digit_of_read(outs_of(row, c));
          #0.5;
          for (int c = 0; c < COLS; c++) vp[row][c] = 0.0;
        end else begin
          rdata = '0;
        end
      end
      busy = 1'b0;
    end
  end
endmodule
