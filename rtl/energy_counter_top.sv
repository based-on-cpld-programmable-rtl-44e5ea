// energy_counter_top: the digital part of the experimental electronic counter
// of a three-phase electrical energy meter.
//
// The energy-meter chip produces one pulse per unit of energy and an enable
// level. A CPLD counts the enabled pulses in six decimal digits
// (pulse_counter), and six BCD-to-LCD decoders show the count on a six-digit
// liquid-crystal display (display_unit). One generator square wave, about
// 200 Hz on the board, serves both sides: it clocks the input flip-flops and
// the counter, and it is the alternating display frequency of the LCD drive.
// This partition, a programmable logic unit and a display unit fed by one
// generator, is the meter's. The generator itself, the energy-meter chip, the
// LCD glass, the power supply, the JTAG programming port and the
// communication port to external memory are outside this RTL: their signals
// are the ports below.
//
// Interface:
//   gen_clk       generator square wave, counter clock and display frequency
//   rst_n         asynchronous active-low power-on reset (count from zero)
//   count_pulse   energy pulses from the meter chip
//   count_enable  count enable from the meter chip (REVP), high = count
//   digits        the count, digits[0] least significant, for an external
//                 memory or data logger
//   seg           segment drive of the six LCD digits, seg[0] rightmost
//   lcd_com       LCD common-plane drive
// Timing: see pulse_counter; the display outputs follow digits and gen_clk
// combinationally.
module energy_counter_top
  import counter_pkg::*;
#(
  parameter int unsigned N_DIGITS = N_DIGITS_DEFAULT
) (
  input  logic                 gen_clk,
  input  logic                 rst_n,
  input  logic                 count_pulse,
  input  logic                 count_enable,
  output bcd_t  [N_DIGITS-1:0] digits,
  output seg7_t [N_DIGITS-1:0] seg,
  output logic                 lcd_com
);

  pulse_counter #(.N_DIGITS(N_DIGITS)) u_plu (
    .clk          (gen_clk),
    .rst_n        (rst_n),
    .count_pulse  (count_pulse),
    .count_enable (count_enable),
    .digits       (digits)
  );

  display_unit #(.N_DIGITS(N_DIGITS)) u_du (
    .digits  (digits),
    .df      (gen_clk),
    .seg     (seg),
    .lcd_com (lcd_com)
  );

endmodule
