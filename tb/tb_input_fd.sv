// tb_input_fd: self-checking testbench of input_fd.
//
// Drives random levels into the flip-flop, changing them away from the clock
// edge, and checks that q always shows the level d had at the last rising
// clock edge, and that reset clears q. A watchdog ends the run as a failure
// if it does not finish in time.
module tb_input_fd;
  logic clk = 1'b0;
  logic rst_n;
  logic d;
  logic q;
  int checks = 0;
  int failures = 0;

  input_fd dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected;
    rst_n = 1'b0;
    d     = 1'b1;
    #12;
    checks++;
    if (q !== 1'b0) begin failures++; $display("reset: q=%b", q); end
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      d = 1'($urandom);
      expected = d;
      #2 d = 1'($urandom);  // change again before the edge
      expected = d;
      @(posedge clk);
      #1 d = ~d;             // change right after the edge: must not show
      checks++;
      if (q !== expected) begin
        failures++;
        $display("cycle %0d: q=%b expected %b", n, q, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
