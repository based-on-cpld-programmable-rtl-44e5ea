// tb_display_unit: self-checking testbench of display_unit.
//
// Drives random digit values (0..9) and both levels of the display
// frequency, and checks every segment line of every LCD digit against a
// reference table of lit segments, and that the LCD common plane follows the
// display frequency. Each digit of the display must show its own counter
// digit, so a swapped or shared decoder input is caught.
module tb_display_unit;
  import counter_pkg::*;
  localparam int unsigned N = 6;
  bcd_t  [N-1:0] digits;
  logic          df;
  seg7_t [N-1:0] seg;
  logic          lcd_com;
  int checks = 0;
  int failures = 0;

  display_unit dut (.digits(digits), .df(df), .seg(seg), .lcd_com(lcd_com));

  // Segments lit for 0..9, bit 0 = segment a.
  function automatic seg7_t lit(input int v);
    case (v)
      0: return seg7_t'(7'h3F);
      1: return seg7_t'(7'h06);
      2: return seg7_t'(7'h5B);
      3: return seg7_t'(7'h4F);
      4: return seg7_t'(7'h66);
      5: return seg7_t'(7'h6D);
      6: return seg7_t'(7'h7D);
      7: return seg7_t'(7'h07);
      8: return seg7_t'(7'h7F);
      default: return seg7_t'(7'h6F);
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int val [N];
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < N; i++) begin
        val[i] = (n < 10) ? ((n + i) % 10) : int'($urandom % 10);
        digits[i] = bcd_t'(val[i]);
      end
      for (int f = 0; f < 2; f++) begin
        df = 1'(f);
        #1;
        for (int i = 0; i < N; i++) begin
          checks++;
          if (seg[i] !== (lit(val[i]) ^ {7{df}})) begin
            failures++;
            $display("digit %0d value %0d df %b: seg %b", i, val[i], df, seg[i]);
          end
        end
        checks++;
        if (lcd_com !== df) begin failures++; $display("lcd_com %b df %b", lcd_com, df); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
