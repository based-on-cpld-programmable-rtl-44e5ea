// cd4055_decoder: BCD to seven-segment decoder and LCD driver of the CD4055
// kind, one per display digit.
//
// A liquid-crystal segment must be driven with alternating voltage: it is
// dark when its segment line and the common plane carry the same square wave
// and visible when they are in antiphase. The decoder therefore takes the
// display-frequency square wave df_in (about 200 Hz on the meter's board),
// passes it on as df_out for the common plane, and drives each segment output
// with df_in for an unlit segment and with its inverse for a lit one, that
// is, the decoded pattern XOR df_in.
//
// Decoding: codes 0-9 give the digits; 6 and 9 are drawn with their tails
// (segment a on 6, segment d on 9) and 7 with segments a, b and c. Codes
// 10-15 give the letters L, H, P, A, a minus sign and a blank, the set the
// CD4055 data sheet lists. The use of a CD4055 for each digit, with the
// display-frequency signal on its DF input, is the meter's; the segment table
// is the part's published one, not something the meter defines, and the
// counter never produces codes above 9.
//
// Interface: bcd = {XD, XC, XB, XA}, XA least significant; y = {YG..YA}, bit
// 0 segment a; df_in and df_out are the DF input and output pins. The module
// is purely combinational; the level shifting to the negative LCD supply of
// the real part is not modelled.
module cd4055_decoder
  import counter_pkg::*;
(
  input  bcd_t  bcd,
  input  logic  df_in,
  output seg7_t y,
  output logic  df_out
);

  seg7_t pattern;

  always_comb begin
    unique case (bcd)
      //                    gfedcba
      4'd0:    pattern = 7'b0111111;
      4'd1:    pattern = 7'b0000110;
      4'd2:    pattern = 7'b1011011;
      4'd3:    pattern = 7'b1001111;
      4'd4:    pattern = 7'b1100110;
      4'd5:    pattern = 7'b1101101;
      4'd6:    pattern = 7'b1111101;
      4'd7:    pattern = 7'b0000111;
      4'd8:    pattern = 7'b1111111;
      4'd9:    pattern = 7'b1101111;
      4'd10:   pattern = 7'b0111000;  // L
      4'd11:   pattern = 7'b1110110;  // H
      4'd12:   pattern = 7'b1110011;  // P
      4'd13:   pattern = 7'b1110111;  // A
      4'd14:   pattern = 7'b1000000;  // minus
      default: pattern = 7'b0000000;  // blank
    endcase
    y      = pattern ^ {7{df_in}};
    df_out = df_in;
  end

endmodule
