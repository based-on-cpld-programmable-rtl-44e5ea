// bcd_decade: one decimal digit of the pulse counter.
//
// The digit is a 4-bit binary up-counter with a count enable, as in the
// schematic, where each digit is a 4-bit counter stage followed by a
// two-input AND gate on its outputs Q1 and Q3. Those two bits are both high
// only at the value 10 (binary 1010); in the schematic the gate output clears
// the stage and clocks the next, more significant stage, so a digit runs
// 0..9, and on the step from 9 to "10" it returns to 0 and hands a carry on.
//
// This module does the same in one clock domain instead of with a rippled
// clock and an asynchronous clear: when an advance is requested it forms the
// incremented value, tests its bits 1 and 3 with the same AND, and loads
// either that value or zero. The carry that the schematic makes with the
// gate output is the output carry, high for the clock cycle in which the
// digit wraps. The synchronous form is this design's choice; the count
// sequence and the carry condition are those of the schematic.
//
// Interface:
//   clk    counter clock (the generator clock)
//   rst_n  asynchronous active-low power-on reset, digit to 0
//   ce     common count enable of all digits
//   inc    advance request: the counted event for the lowest digit,
//          the carry of the digit below for the others
//   q      the digit, Q3..Q0
//   carry  high in the cycle in which the digit steps from 9 to 0
// Timing: q changes at the rising clk edge at which ce and inc are both high;
// carry is combinational from q, ce and inc.
module bcd_decade
  import counter_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic ce,
  input  logic inc,
  output bcd_t q,
  output logic carry
);

  bcd_t next_q;
  logic at_ten;

  always_comb begin
    next_q = q + bcd_t'(1);
    // AND of Q1 and Q3: the value 10 has been reached.
    at_ten = next_q[1] & next_q[3];
    carry  = ce & inc & at_ten;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          q <= '0;
    else if (ce && inc)  q <= at_ten ? '0 : next_q;
  end

endmodule
