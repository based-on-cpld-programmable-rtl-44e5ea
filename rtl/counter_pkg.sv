// counter_pkg: types and constants shared by the energy-meter pulse counter
// and its display unit.
//
// The counter keeps its total as six binary-coded decimal digits, one 4-bit
// code per digit (the width of the 4-bit counter stage used for every
// decade). The display side works with seven-segment patterns, bit 0 being
// segment a and bit 6 segment g. The number of digits, six, follows the
// six-digit LCD of the meter; the bit order of a segment pattern is this
// design's own choice.
package counter_pkg;

  // Number of decimal digits of the counter and of the LCD.
  localparam int unsigned N_DIGITS_DEFAULT = 6;

  // One decimal digit: Q3..Q0 of a 4-bit counter stage, Q0 least significant.
  localparam int unsigned BCD_W = 4;
  typedef logic [BCD_W-1:0] bcd_t;

  // Seven-segment pattern, {g, f, e, d, c, b, a}; a 1 lights the segment.
  typedef logic [6:0] seg7_t;

endpackage
