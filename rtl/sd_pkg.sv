// sd_pkg: types and helpers shared by the signed-digit (SD) arithmetic unit.
//
// A radix-2 signed digit takes a value in {-1, 0, 1}. For logic processing it
// is carried as two wires, a positive part p and a negative part n, in the
// coding of Muller and Duprat: (p,n) = 00 -> 0, 01 -> -1, 10 -> 1, 11 is not
// defined and never produced by the arithmetic cells.
//
// For storage each digit occupies a single three-level (multi-bit) memristor
// cell. The cell's threshold read circuit raises exactly one of three lines,
// Out0, Out1 or Out2. Which resistance level stands for which digit is this
// design's choice: Out0 = -1, Out1 = 0, Out2 = +1 (ordered by value).
package sd_pkg;

  // One SD digit in (positive, negative) coding.
  typedef struct packed {
    logic p;
    logic n;
  } sd_digit_t;

  // Resistance level of a three-level cell, as seen by the threshold read.
  typedef enum logic [1:0] {
    LVL_NEG  = 2'd0,  // read raises Out0, digit -1
    LVL_ZERO = 2'd1,  // read raises Out1, digit  0
    LVL_POS  = 2'd2   // read raises Out2, digit +1
  } mlc_level_t;

  localparam sd_digit_t SD_ZERO = '{p: 1'b0, n: 1'b0};
  localparam sd_digit_t SD_POS  = '{p: 1'b1, n: 1'b0};
  localparam sd_digit_t SD_NEG  = '{p: 1'b0, n: 1'b1};

  // Level a digit is programmed to. The undefined code 11 is stored as 0.
  function automatic mlc_level_t level_of(sd_digit_t d);
    if (d.p && !d.n) return LVL_POS;
    if (d.n && !d.p) return LVL_NEG;
    return LVL_ZERO;
  endfunction

  // Digit recovered from the one-hot outputs {Out2, Out1, Out0} of a read.
  function automatic sd_digit_t digit_of_read(logic [2:0] outs);
    sd_digit_t d;
    // A read that does not raise exactly one line gives the digit 0.
    d.p = outs[2] & ~outs[1] & ~outs[0];
    d.n = outs[0] & ~outs[1] & ~outs[2];
    return d;
  endfunction

  // One-hot read outputs {Out2, Out1, Out0} for a stored level.
  function automatic logic [2:0] read_of_level(mlc_level_t l);
    case (l)
      LVL_NEG: return 3'b001;
      LVL_POS: return 3'b100;
      default: return 3'b010;
    endcase
  endfunction

endpackage
