# Signed-digit arithmetic with multi-level memristor registers

A radix-2 signed digit (SD) takes one of three values, -1, 0 or +1. Adding two
numbers in SD form needs no carry chain: every digit position settles after a
constant number of gate delays, whatever the word length. The drawback is
storage. In logic, each digit is two wires, so a register holding SD numbers
needs twice as many flip-flops as a binary one.

A memristor can be programmed to several stable resistance levels. With three
levels one cell holds exactly one signed digit, and the storage cost drops back
to one cell per digit. This RTL builds an SD arithmetic unit on that idea:

* carry-free add/subtract rows of digit processor cells;
* registers and a register file that keep one digit per three-level cell;
* an N-row pipelined multiplier and an N-row pipelined divider. Both accept one
  operation per clock and deliver it N clocks later;
* conversion back to two's complement: one subtractor for a whole word, and the
  on-the-fly algorithm for quotient digits that arrive one at a time;
* behavioural models of the analog memristor cell, of its threshold read and
  of a small crossbar memory built from them, whose read lines feed the
  add/sub row.

All files are SystemVerilog (IEEE 1800-2017). Everything in `rtl/` except
`memristor_cell`, `voltage_interpreter`, `mlc_crossbar` and `sd_mem_system`
is synthesizable. `sd_mem_alu` is the synthesizable unit; `sd_mem_system`
wraps it together with the analog memory model for simulation.

## Digit coding

Each digit `d` is carried as a positive part `p` and a negative part `n`:

| p | n | digit |
|---|---|-------|
| 0 | 0 | 0 |
| 0 | 1 | -1 |
| 1 | 0 | +1 |
| 1 | 1 | undefined, never produced |

`sd_pkg::sd_digit_t` is this pair, and vectors of it (`sd_digit_t [W-1:0]`)
are SD words with digit 0 as the least significant. The package also defines
the three storage levels and the conversions between digit and level:

| level | read line raised | digit |
|-------|------------------|-------|
| `LVL_NEG`  | Out0 | -1 |
| `LVL_ZERO` | Out1 | 0 |
| `LVL_POS`  | Out2 | +1 |

Which resistance stands for which digit is a choice made here. Change
`level_of` and `read_of_level` in `sd_pkg` to change it.

## The digit processor cell

Every row of every unit is built from one cell, `sd_digit_cell`. It adds a
binary digit `B` (0 or 1) to an SD digit `a`, in two steps.

**Step 1 (`add_step1`).** `a + B` lies in {-1, 0, 1, 2}. It is rewritten as
`2c - z`: a transfer `c` in {0, 1} that moves one position up, and an interim
digit `z` in {0, 1} that stays. So `c` has only a positive part and `z` only a
negative part:

    c+ = a+ | (B & ~a-)
    z- = (a+ | a-) ^ B

**Step 2 (`add_step2`).** The sum digit is `s = c(from below) - z`. That
difference is always in {-1, 0, 1}, so nothing more propagates:

    s+ = ~z- & c+(i-1)
    s- = ~c+(i-1) & z-

**Subtraction.** Negating an SD digit swaps its two parts. `a - B` is computed
as `-((-a) + B)`. An exchange/bypass switch (`eb_switch`) sits at the cell's
input and another at its output, and `sub` drives both. One consequence is easy
to trip over: in subtract mode the transfer leaving a cell belongs to the
negated sum, so it weighs `-2`. All cells of a row share `sub`, so a row is
always consistent.

**Zero.** `zero_n = 0` forces `B` to 0 through an AND gate, and the cell then
passes `a` through unchanged. The multiplier and the divider use this for their
"add nothing" rows. The cell also hands `B` on (`b_out`) to the row below.

`sd_add_row` puts `W` cells side by side. The lowest transfer input is 0. The
transfer out of the top cell becomes an extra digit `s[W]`, so the W+1 digit
result is exact. The row's delay is one cell's delay for any `W`.

## Multi-level storage

`mlc_sd_reg` is a register of `W` digits. `mlc_sd_regfile` is a register file
of `DEPTH` words with one write port and two read ports. Both store a level per
digit (`mlc_level_t`). A write programs the level on the clock edge. A read
goes through the one-hot read lines (Out0/Out1/Out2) and back to `(p, n)`, the
way the threshold read of a real cell would. Reset is synchronous and
active-low, and sets every cell to the zero level. Register file reads are
combinational; a read of the word being written returns the old value.

These two modules are the digital view of the cells. The analog side has two
behavioural models, for simulation only:

* `memristor_cell`: a memristor in series with a 100 ohm read resistor. The
  state `x` in [0, 1] sets the resistance `R = R_ON*x + R_OFF*(1-x)`. It drifts
  as `dx/dt = k*i*f(x)`, with `k = mu_v*R_ON/D^2` and the window
  `f(x) = 1 - (2x-1)^(2p)`. Forward Euler takes one step per simulation time
  unit, which stands for `DT_S` seconds. With no voltage applied, every `x`
  holds. `x` is kept a hair inside its range (`X_EPS` from either end): the
  window is exactly zero at 0 and 1, so a state that landed there could never
  move again. `R_ON`, `R_OFF`, `mu_v` and `D` are typical published values,
  not measured ones.
* `voltage_interpreter`: the diode chain and comparators behind the read. It
  places the intermediate-node voltage in one of three bands and raises exactly
  one of `out0`, `out1`, `out2`. The band edges (11 mV and 30 mV) are chosen to
  separate the three levels of the cell model at a 1.2 V read.

`tb/memristor_cell_tb.sv` uses the two models together. It writes each level
with a program-and-verify loop (read, then pulse +/-1.2 V towards the wanted
level) and checks retention. It also checks the pinched hysteresis loop under a
1 Hz sine.

`mlc_crossbar` puts these models together into a small memory: `ROWS` words
of `COLS` digits, one `memristor_cell` and one `voltage_interpreter` per
digit. A rising `we` programs a word; a rising `re` reads one back through the
comparators into `rdata`. `busy` is high while an operation runs and requests
that arrive meanwhile are ignored. Writes use program-and-verify: pulses of
`V_PROG` until the read lines show the wanted level. Each read at 1.2 V nudges
the state a little towards low resistance, so a cell left just inside a band
edge would drift out after some reads. To leave margin, the middle level is
always reached from below (the cell is first driven down to the lowest level)
and `EXTRA` further pulses push it into the band. `err` is raised if a digit
does not reach its level within `MAX_PULSES`. Sneak paths and line resistance
are not modelled: each cell is driven as if through an ideal selector.

## Multiplier pipeline (`sd_mul_pipeline`)

This is shift-and-add with an SD partial sum. The partial sum `s` starts at 0.
Row `k` looks at the current most significant bit of `A`. If the bit is 1, the
row adds `B`; if it is 0, it pulls `zero_n` low and adds nothing. The row then
shifts `s` and `A` left by one. The last row adds without shifting.

Each row is one `sd_add_row`, so the clock period does not grow with `N`.
Between rows, `s` sits in an `mlc_sd_reg`, while `A`, `B` and a valid bit use
ordinary flip-flops.

* Operands: N-bit unsigned `a`, `b`. Result: the 2N-digit SD product `p_sd`
  and its two's complement `p`.
* Timing: `in_valid` may be high on every clock. `out_valid` and the product
  follow exactly N clocks later. There is no back-pressure.
* Width: the partial sum is 2N digits and is kept modulo 2^(2N). The transfer
  out of the top digit and the digit shifted out are dropped. The product is
  below 2^(2N), so `p` is exact. The SD digits `p_sd` equal the product
  modulo 2^(2N), but their plain digit sum may be the product minus 2^(2N).

## Divider pipeline (`sd_div_pipeline`)

This is the least obvious part. The divider is a radix-2 division in which
every quotient digit is the sign of the partial remainder. For N-bit unsigned
`A` and `B > 0`:

    D = B * 2^(N-1)                 (divisor aligned once)
    r = A
    for i = 1 .. N:
        q[N-i] = sign(r)            (+1, 0 or -1)
        r      = 2 * (r - q[N-i] * D)

Row `i` maps its digit onto the cell controls: `q = +1` subtracts `D`, `q = -1`
adds `D`, and `q = 0` pulls `zero_n` low.

**Why it converges.** Suppose `|r| < 2D` before a row. If `r > 0`, then
`r - D` lies in `(-D, D)`, and doubling gives `(-2D, 2D)`. The case `r < 0` is
symmetric. If `r` is near 0, `2r` stays small. The bound therefore holds after
every row. Initially `A < 2^N <= 2D`. Unrolling the loop gives

    A = Q*B + R,   Q = sum q[j]*2^j,   R = r_final / 2^N,   -B < R < B

so `Q` equals `floor(A/B)` or is one above it. A negative `R` means one above.
The unit reports `R` (in `sd_mem_alu`) but does not correct `Q`.

**Selecting the digit without a carry chain.** `q_select` needs only the sign
of `r`, and only roughly: "zero" may mean anything smaller than one unit of
digit `N-1`. It adds up the positive parts and the negative parts of digits
`2N+1 .. N-1` in an (N+3)-bit adder and takes the sign of the difference. The
dropped low digits sum to less than one unit, so a positive estimate means
`r > 0` and a negative one means `r < 0`. A zero estimate means `|r| < 2^(N-1)`.
That is at most `D`, which is small enough for the bound above. The remainder
is 2N+2 digits kept modulo 2^(2N+2). Since `|r| < 2^(2N)`, the (N+3)-bit
estimate never wraps.

The original description selects from the top three digits only. That is not
enough once digits are dropped at the top of a fixed-width SD word. The wider
estimate is this design's change.

**Quotient conversion on the fly.** Each row also holds one `otf_step`. Two
registers follow the digits: `qa`, the quotient so far, and `qb = qa - 1`. For
the next digit `q`:

| q  | qa'       | qb'       |
|----|-----------|-----------|
| +1 | 2*qa + 1  | 2*qa      |
| 0  | 2*qa      | 2*qb + 1  |
| -1 | 2*qb + 1  | 2*qb      |

Every step only shifts and appends a bit, so the two's complement quotient `q`
(N+1 bits) is ready with the last digit. For example, the digits 1, -1, 0, 1, 0
give `qa` = 1, 01, 010, 0101, 01010 (ten).

* Ports: `a`, `b`, `in_valid` in; `out_valid`, `q_sd` (digit N-1 first),
  `q`, and `r_sd` (the final remainder times 2^N, as SD) out.
* Timing: one operation per clock, results N clocks later.

## The arithmetic unit: `sd_mem_alu`

Three units stand side by side. All share `clk` and `rst_n` (synchronous,
active low).

* **Register file with add/sub.** When `as_valid` is high, register `as_ra` is
  read, `as_b` is added (`as_sub = 0`) or subtracted (`as_sub = 1`) in one
  carry-free row, and the result is written to `as_rd` on the same clock edge.
  `as_load = 1` uses 0 instead of register `as_ra`, which loads `+/-as_b`.
  `as_ext = 1` takes the SD word on `as_ext_a` instead (`as_load` wins).
  Words are 2N digits, kept modulo 2^(2N). Repeated accumulation into a
  register never has to propagate a carry; the value is resolved only when
  someone looks at it. `rd_addr` selects a register for `rd_sd` (SD) and
  `rd_bin` (two's complement, converted by `sd_to_bin`).
* **Multiplier**: `mul_*` ports, as described above.
* **Divider**: `div_*` ports, plus `div_r`, the remainder `R` in N+2 bits of
  two's complement.

Defaults: `N = 8`, `DEPTH = 8`. No source value exists for either. Any
`N >= 2` works.

## The whole system: `sd_mem_system`

This is where the analog memory meets the arithmetic. `sd_mem_system` holds
one `sd_mem_alu` and one `mlc_crossbar` of `XB_ROWS` (default 4) words of 2N
digits. The crossbar's read lines, decoded to SD digits, drive `as_ext_a`
directly: a word read from the memristor cells can be the SD operand of the
add/sub row without any conversion, and the sum goes to the register file.
All `sd_mem_alu` ports except `as_ext_a` are brought out, plus the crossbar's
`xb_we`, `xb_waddr`, `xb_wdata`, `xb_re`, `xb_raddr`, `xb_rdata`, `xb_busy`
and `xb_err`.

The crossbar is not clocked. A read takes one time unit and a write takes
many program-and-verify pulses per digit, so the user starts an operation
with a rising `xb_we` or `xb_re`, waits for `xb_busy` to fall, and only then
relies on `xb_rdata`. The clocked units keep working meanwhile.

Reads are not free in the cell model: each one pushes the state a little
towards low resistance. With the defaults, a freshly written word read over
and over first showed an error after 48 reads (a -1 digit), and a 0 digit
after 72. A word must therefore be rewritten from time to time; the
end-to-end test does so after 20 reads. A lower read voltage (with the
comparator thresholds scaled by the same factor) stretches this in
proportion. No refresh logic is part of the design.

## How far it can be trusted, and where it departs

Verified in simulation:

* the digit cell over all 48 valid input combinations;
* rows, registers, the register file and the converters on random data;
* `q_select` against the true sign;
* the crossbar model over 10 rounds of random words, each word read back 8
  times in a row, with no read disturb showing;
* the whole system with its defaults: the crossbar filled and rewritten while
  4000 clocks of random traffic run, crossbar words used as add/sub operands,
  and every crossbar read checked;
* multiplier and divider on 2000 streamed operations each, including the
  latency of N clocks and back-to-back issue;
* `sd_mem_alu` on 4000 clocks of mixed random traffic at its default size.

The two end-to-end testbenches count and require each mechanism: add,
subtract, load, an external SD operand, modulo wrap, multiplier rows that add
and rows that skip, back-to-back issue, all three quotient digit values, and
negative remainders; the system test adds crossbar writes, crossbar reads and
clocked work during a crossbar write. Every testbench was
also run against a deliberately broken copy of its module and caught it.

Choices and departures:

* Divider: the divisor is aligned once (`D = B*2^(N-1)`) and stays fixed. The
  original algorithm halves `B` after the first row; with that halving the
  quotient digits would not carry consecutive binary weights.
* Divider: the quotient digit comes from all digits above position N-1
  instead of the top three (see above). The quotient may be one above
  `floor(A/B)`, and no correction stage is included.
* Widths, the valid bit, reset, the level-to-digit mapping, the register file
  organisation, `as_load`, `as_ext`, the crossbar size and handshake, and modulo handling of the top digit are this
  design's own choices.
* Whole SD words are converted with one subtractor (`sd_to_bin`). The
  on-the-fly method is used where digits arrive serially (divider).
* The register file inside `sd_mem_alu` is an array of level codes with
  ideal reads and writes. The analog crossbar model (`mlc_crossbar`) sits
  beside it in `sd_mem_system` and is for simulation only; its drivers,
  sneak paths and wire resistance are not modelled.
* The cell and threshold-read models are behavioural. Their device constants
  and band edges are typical values, not characterised ones.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/sd_pkg.sv tb/sd_mem_system_tb.sv --top-module sd_mem_system_tb
    ./obj_dir/Vsd_mem_system_tb

Every `tb/<module>_tb.sv` works the same way, with its own `--top-module`.
Each prints `TB_RESULT checks=<n> failures=<m>` and stops. A watchdog counts a
failure if a testbench hangs. The end-to-end test (`sd_mem_system_tb`, all defaults) runs in about a
second; `sd_mem_alu_tb` runs the same traffic without the crossbar.

To change the size, set `N` (and `DEPTH`, `XB_ROWS`) on `sd_mem_system` or
`N` and `DEPTH` on `sd_mem_alu`. Every width follows
from `N`: words and products are 2N digits, and the divider remainder is 2N+2
digits. `tb/sd_mem_system_tb.sv` and `tb/sd_mem_alu_tb.sv` have matching
`localparam`s.

## File map

| file | contents |
|------|----------|
| `rtl/sd_pkg.sv` | digit type, storage levels, conversions |
| `rtl/eb_switch.sv` | exchange/bypass switch |
| `rtl/add_step1.sv`, `rtl/add_step2.sv` | the two addition steps |
| `rtl/sd_digit_cell.sv` | digit processor cell |
| `rtl/sd_add_row.sv` | W-digit SD +/- binary row |
| `rtl/mlc_sd_reg.sv`, `rtl/mlc_sd_regfile.sv` | three-level-cell register and register file |
| `rtl/sd_to_bin.sv`, `rtl/otf_step.sv` | conversions to two's complement |
| `rtl/q_select.sv` | quotient digit selection |
| `rtl/sd_mul_pipeline.sv`, `rtl/sd_div_pipeline.sv` | the two pipelines |
| `rtl/sd_mem_alu.sv` | synthesizable arithmetic unit |
| `rtl/sd_mem_system.sv` | top: the unit with the crossbar memory model |
| `rtl/memristor_cell.sv`, `rtl/voltage_interpreter.sv` | behavioural analog models |
| `rtl/mlc_crossbar.sv` | behavioural memory built from the analog models |
| `tb/*_tb.sv` | one self-checking testbench per module |
