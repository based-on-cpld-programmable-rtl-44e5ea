// display_unit: the meter's display unit, six BCD-to-LCD decoders in front
// of a six-digit seven-segment liquid-crystal display.
//
// Every decoder (cd4055_decoder) receives one counter digit and the common
// display-frequency square wave from the board's generator; the display
// frequency output of the first decoder drives the common plane of the LCD,
// so each segment line is either in phase with the common plane (segment
// dark) or in antiphase (segment lit). That arrangement, six CD4055 decoders
// sharing the generator signal and one of them driving the LCD common, is
// the meter's. Which counter digit goes to which decoder is this design's
// choice: digits[0], the least significant, goes to the first decoder D1,
// which drives the rightmost LCD digit.
//
// Interface:
//   digits   BCD digits from the counter, digits[0] least significant
//   df       display-frequency square wave (about 200 Hz on the board)
//   seg      seg[i] drives the seven segments {g..a} of LCD digit i
//   lcd_com  drive of the LCD common plane
// The module is combinational.
module display_unit
  import counter_pkg::*;
#(
  parameter int unsigned N_DIGITS = N_DIGITS_DEFAULT
) (
  input  bcd_t  [N_DIGITS-1:0] digits,
  input  logic                 df,
  output seg7_t [N_DIGITS-1:0] seg,
  output logic                 lcd_com
);

  logic [N_DIGITS-1:0] df_out;

  for (genvar i = 0; i < N_DIGITS; i++) begin : g_decoder
    cd4055_decoder u_decoder (
      .bcd    (digits[i]),
      .df_in  (df),
      .y      (seg[i]),
      .df_out (df_out[i])
    );
  end

  // Only the first decoder's DF output is wired to the LCD; the others are
  // left open as on the board.
  assign lcd_com = df_out[0];

endmodule
