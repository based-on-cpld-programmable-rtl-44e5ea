// tb_pulse_counter: self-checking testbench of pulse_counter.
//
// Runs the counter with three digits so that it wraps quickly. The
// testbench keeps a cycle-level reference: the two input levels as sampled at
// each rising clock edge, the previous sampled pulse, and a decimal total that
// grows by one whenever the sampled pulse rises while the sampled enable is
// high. After every edge all digits are compared with the total. Directed
// parts check the latency of one clean pulse (two clock edges from the first
// edge that sees it high), that a pulse too short to meet a clock edge is not
// counted, that a disabled counter holds, and the wrap from 999 to 000. Random
// parts then drive pulses of random lengths and a toggling enable.
module tb_pulse_counter;
  import counter_pkg::*;
  localparam int unsigned N = 3;
  localparam int unsigned MODULUS = 1000;

  logic clk = 1'b0;
  logic rst_n;
  logic count_pulse, count_enable;
  bcd_t [N-1:0] digits;
  int checks = 0;
  int failures = 0;

  // Reference state.
  logic ref_pq = 1'b0, ref_prev = 1'b0, ref_en = 1'b0;
  int   total = 0;
  int   wraps = 0;
  int   counted = 0;

  pulse_counter #(.N_DIGITS(N)) dut (
    .clk(clk), .rst_n(rst_n), .count_pulse(count_pulse),
    .count_enable(count_enable), .digits(digits)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (ref_pq && !ref_prev && ref_en) begin
        total = total + 1;
        counted++;
        if (total == MODULUS) begin total = 0; wraps++; end
      end
      ref_prev = ref_pq;
      ref_pq   = count_pulse;
      ref_en   = count_enable;
    end
  end

  task automatic compare(input string what);
    int v;
    v = total;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (digits[i] !== bcd_t'(v % 10)) begin
        failures++;
        $display("%s: digit %0d = %0d, expected %0d (total %0d)", what, i, digits[i], v % 10, total);
      end
      v = v / 10;
    end
  endtask

  // Drive new input levels after a falling edge, then check after the next
  // rising edge.
  task automatic cycle(input logic p, input logic e);
    @(negedge clk);
    count_pulse  = p;
    count_enable = e;
    @(posedge clk);
    #1 compare("cycle");
  endtask

  initial begin
    int prior;
    rst_n = 1'b0;
    count_pulse = 1'b0;
    count_enable = 1'b0;
    #22;
    compare("reset");
    @(negedge clk);
    rst_n = 1'b1;

    // Latency of one clean pulse, enable already high.
    cycle(1'b0, 1'b1);
    cycle(1'b0, 1'b1);
    @(negedge clk);
    count_pulse = 1'b1;
    prior = total;
    @(posedge clk); #1;            // first edge that sees the pulse high
    checks++;
    if (digits[0] !== bcd_t'(prior)) begin failures++; $display("counted too early"); end
    @(posedge clk); #1;            // second edge: now counted
    checks++;
    if (digits[0] !== bcd_t'(prior + 1)) begin
      failures++; $display("latency: digit0=%0d expected %0d", digits[0], prior + 1);
    end
    cycle(1'b0, 1'b1);

    // A glitch between two clock edges is not seen.
    prior = total;
    @(negedge clk);
    #1 count_pulse = 1'b1;
    #2 count_pulse = 1'b0;
    repeat (3) cycle(1'b0, 1'b1);
    checks++;
    if (total != prior) begin failures++; $display("reference counted a glitch"); end
    compare("glitch");

    // Enable low: pulses are ignored.
    for (int n = 0; n < 20; n++) begin
      cycle(1'b1, 1'b0);
      cycle(1'b0, 1'b0);
    end
    checks++;
    if (total != prior) begin failures++; $display("counted while disabled"); end

    // Clean pulses up to and through the wrap.
    while (wraps == 0) begin
      cycle(1'b1, 1'b1);
      cycle(1'b0, 1'b1);
    end

    // Random pulse lengths and enable changes.
    for (int n = 0; n < 20000; n++)
      cycle(1'($urandom), ($urandom % 8) != 0);

    checks++;
    if (wraps < 1 || counted < 1000) begin
      failures++; $display("too little activity: wraps %0d counted %0d", wraps, counted);
    end
    $display("counted %0d pulses, %0d wraps", counted, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
