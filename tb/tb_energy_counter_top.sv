// tb_energy_counter_top: end-to-end, full-size testbench of
// energy_counter_top with its default six digits.
//
// The generator clock runs, the meter's pulse and enable lines are driven
// with pulses of random high and low lengths, and the count is taken once
// all the way from 000000 through 999999 and back to 000000. A cycle-level
// reference samples both lines at each rising clock edge exactly as the
// input flip-flops do and adds one to a decimal total whenever the sampled
// pulse rises while the sampled enable is high. After every edge the six
// digits are compared with the total, and on both clock phases the segment
// lines of all six LCD digits and the common plane are compared with a table
// of lit segments (lit segment = antiphase to the common plane).
//
// Mechanisms counted, each required at least once: counted pulses, pulses
// dropped because the enable was low, glitches between clock edges that must
// not count, a carry into each of digits 1 to 5, and the wrap of the whole
// counter. Also checked once: a clean pulse appears in the count at the
// second clock edge that sees it high.
module tb_energy_counter_top;
  import counter_pkg::*;
  localparam int unsigned N = 6;
  localparam int MODULUS = 1000000;

  logic gen_clk = 1'b0;
  logic rst_n;
  logic count_pulse, count_enable;
  bcd_t  [N-1:0] digits;
  seg7_t [N-1:0] seg;
  logic lcd_com;

  int checks = 0;
  int failures = 0;

  // Reference state and mechanism counters.
  logic ref_pq = 1'b0, ref_prev = 1'b0, ref_en = 1'b0;
  int total = 0;
  int counted = 0;
  int dropped = 0;
  int glitches = 0;
  int wraps = 0;
  int carries [N];

  energy_counter_top dut (
    .gen_clk(gen_clk), .rst_n(rst_n), .count_pulse(count_pulse),
    .count_enable(count_enable), .digits(digits), .seg(seg), .lcd_com(lcd_com)
  );

  always #5 gen_clk = ~gen_clk;

  initial begin
    repeat (12000000) @(posedge gen_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  // Reference: sample at each rising edge, as the input flip-flops do.
  always @(posedge gen_clk) begin
    if (rst_n) begin
      if (ref_pq && !ref_prev) begin
        if (ref_en) begin
          int p;
          counted++;
          p = 1;
          for (int i = 1; i < N; i++) begin
            p = p * 10;
            if (total % p == p - 1) carries[i]++;
          end
          total = total + 1;
          if (total == MODULUS) begin total = 0; wraps++; end
        end else begin
          dropped++;
        end
      end
      ref_prev = ref_pq;
      ref_pq   = count_pulse;
      ref_en   = count_enable;
    end
  end

  task automatic compare_digits();
    int v;
    v = total;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (digits[i] !== bcd_t'(v % 10)) begin
        failures++;
        if (failures < 20)
          $display("digit %0d = %0d, expected %0d (total %0d)", i, digits[i], v % 10, total);
      end
      v = v / 10;
    end
  endtask

  task automatic compare_display();
    int v;
    v = total;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (seg[i] !== (lit(v % 10) ^ {7{gen_clk}})) begin
        failures++;
        if (failures < 20) $display("LCD digit %0d: seg %b for %0d", i, seg[i], v % 10);
      end
      v = v / 10;
    end
    checks++;
    if (lcd_com !== gen_clk) begin failures++; $display("lcd_com wrong"); end
  endtask

  int cyc = 0;
  always @(posedge gen_clk) begin
    #1;
    if (rst_n) begin
      compare_digits();
      cyc++;
      if (cyc % 16 == 0) compare_display();
    end
  end
  always @(negedge gen_clk) begin
    #1;
    if (rst_n && (cyc % 16 == 0)) compare_display();
  end

  task automatic hold(input logic p, input logic e, input int n);
    @(negedge gen_clk);
    count_pulse  = p;
    count_enable = e;
    repeat (n - 1) @(negedge gen_clk);
  endtask

  initial begin
    int prior;
    foreach (carries[i]) carries[i] = 0;
    rst_n = 1'b0;
    count_pulse = 1'b0;
    count_enable = 1'b0;
    #22;
    checks++;
    if (digits !== '0) begin failures++; $display("reset: digits %h", digits); end
    @(negedge gen_clk);
    rst_n = 1'b1;

    // Latency of one clean pulse.
    hold(1'b0, 1'b1, 3);
    @(negedge gen_clk);
    count_pulse = 1'b1;
    @(posedge gen_clk); #2;
    checks++;
    if (digits[0] !== bcd_t'(0)) begin failures++; $display("counted too early"); end
    @(posedge gen_clk); #2;
    checks++;
    if (digits[0] !== bcd_t'(1)) begin failures++; $display("latency wrong: %0d", digits[0]); end
    hold(1'b0, 1'b1, 2);

    // Glitches between clock edges.
    prior = total;
    for (int n = 0; n < 5; n++) begin
      @(negedge gen_clk);
      #1 count_pulse = 1'b1;
      #2 count_pulse = 1'b0;
      glitches++;
      hold(1'b0, 1'b1, 2);
    end
    checks++;
    if (total != prior) begin failures++; $display("glitch counted by reference"); end

    // Main run: random pulse shapes, enable mostly high, until one wrap and
    // a little beyond.
    while (wraps == 0 || total < 50) begin
      logic e;
      e = ($urandom % 32) != 0;
      hold(1'b1, e, 1 + int'($urandom % 2));
      hold(1'b0, e, 1 + int'($urandom % 2));
    end
    hold(1'b0, 1'b1, 3);

    checks++;
    if (counted == 0) begin failures++; $display("no pulse counted"); end
    checks++;
    if (dropped == 0) begin failures++; $display("no pulse dropped by enable"); end
    checks++;
    if (glitches == 0) begin failures++; $display("no glitch applied"); end
    checks++;
    if (wraps == 0) begin failures++; $display("counter never wrapped"); end
    for (int i = 1; i < N; i++) begin
      checks++;
      if (carries[i] == 0) begin failures++; $display("no carry into digit %0d", i); end
    end
    $display("counted %0d, dropped %0d, glitches %0d, wraps %0d", counted, dropped, glitches, wraps);
    for (int i = 1; i < N; i++) $display("carries into digit %0d: %0d", i, carries[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
