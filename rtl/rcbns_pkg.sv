// rcbns_pkg: types and constants shared by the RCBNS serial adder.
//
// A Redundant Complex Binary Number System (RCBNS) number is a string of
// digits x_i in -3..+3 weighted by powers of the complex radix (-1+j):
//   X = sum_i x_i * (-1+j)**i
// Each digit is held in three bits in sign-magnitude form. In the bit names
// of the adder's truth table, a0 is the sign and a1 a2 the magnitude with a1
// the more significant bit, so that the truth-table row number of an operand
// pair is simply {a0 a1 a2 b0 b1 b2}. This encoding follows the truth table;
// "100" (minus zero) is accepted as an input and read as zero, but the adder
// never produces it.
package rcbns_pkg;

  // One RCBNS digit: sign bit (a0) then 2-bit magnitude (a1 a2).
  typedef struct packed {
    logic       sign;
    logic [1:0] mag;
  } digit_t;

  // Signed value of a digit, -3..+3.
  function automatic int digit_value(digit_t d);
    return d.sign ? -int'(d.mag) : int'(d.mag);
  endfunction

  // Digit encoding of a value in -3..+3 (zero is always encoded as "000").
  function automatic digit_t digit_encode(int v);
    digit_t d;
    d.sign = (v < 0);
    d.mag  = (v < 0) ? 2'(-v) : 2'(v);
    return d;
  endfunction

endpackage
