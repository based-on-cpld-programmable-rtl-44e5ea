// tb_cd4055_decoder: self-checking testbench of cd4055_decoder.
//
// For each of the 16 input codes and both levels of the display-frequency
// input, compares every segment output with a reference written as the list
// of lit segment letters of each character, and checks that the DF output
// follows the DF input. A lit segment must be in antiphase with DF, a dark
// one in phase.
module tb_cd4055_decoder;
  import counter_pkg::*;
  bcd_t  bcd;
  logic  df_in;
  seg7_t y;
  logic  df_out;
  int checks = 0;
  int failures = 0;

  cd4055_decoder dut (.bcd(bcd), .df_in(df_in), .y(y), .df_out(df_out));

  // Lit segments of codes 0..15: digits, then L H P A minus blank.
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                      "acdefg", "abc", "abcdefg", "abcdfg",
                      "def", "bcefg", "abefg", "abcefg", "g", ""};

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int code = 0; code < 16; code++) begin
      for (int f = 0; f < 2; f++) begin
        bcd   = bcd_t'(code);
        df_in = 1'(f);
        #1;
        for (int s = 0; s < 7; s++) begin
          logic on;
          on = 1'b0;
          for (int k = 0; k < lit[code].len(); k++)
            if (lit[code][k] == byte'("a" + s)) on = 1'b1;
          checks++;
          if (y[s] !== (on ? ~df_in : df_in)) begin
            failures++;
            $display("code %0d df %0d segment %s: %b", code, f, string'(byte'("a" + s)), y[s]);
          end
        end
        checks++;
        if (df_out !== df_in) begin failures++; $display("df_out=%b", df_out); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
