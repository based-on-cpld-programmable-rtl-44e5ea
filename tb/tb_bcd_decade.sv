// tb_bcd_decade: self-checking testbench of bcd_decade.
//
// Applies random count-enable and advance requests for many cycles and holds
// the digit and its carry against an integer model: the digit counts 0..9
// when both requests are high and returns to 0 with a carry after 9. Reset
// and a run of advances with the enable low are checked too. A watchdog ends
// the run as a failure if it does not finish in time.
module tb_bcd_decade;
  import counter_pkg::*;
  logic clk = 1'b0;
  logic rst_n;
  logic ce, inc;
  bcd_t q;
  logic carry;
  int checks = 0;
  int failures = 0;
  int model = 0;
  int wraps = 0;

  bcd_decade dut (.clk(clk), .rst_n(rst_n), .ce(ce), .inc(inc), .q(q), .carry(carry));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic c, input logic i);
    logic exp_carry;
    @(negedge clk);
    ce  = c;
    inc = i;
    #1;
    exp_carry = c && i && (model == 9);
    checks++;
    if (carry !== exp_carry) begin
      failures++;
      $display("carry=%b expected %b (model %0d)", carry, exp_carry, model);
    end
    if (exp_carry) wraps++;
    @(posedge clk);
    if (c && i) model = (model + 1) % 10;
    #1;
    checks++;
    if (q !== bcd_t'(model)) begin
      failures++;
      $display("q=%0d expected %0d", q, model);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    ce = 1'b0;
    inc = 1'b0;
    #12;
    checks++;
    if (q !== '0) begin failures++; $display("reset: q=%0d", q); end
    rst_n = 1'b1;
    // Thirty plain advances: three full decades.
    for (int n = 0; n < 30; n++) step(1'b1, 1'b1);
    // Enable low: nothing may move.
    for (int n = 0; n < 20; n++) step(1'b0, 1'b1);
    // Random mix.
    for (int n = 0; n < 3000; n++) step(1'($urandom), 1'($urandom));
    checks++;
    if (wraps < 10) begin failures++; $display("too few wraps: %0d", wraps); end
    $display("wraps seen: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
