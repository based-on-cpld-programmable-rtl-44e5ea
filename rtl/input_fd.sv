// input_fd: D flip-flop that samples one input line of the counter.
//
// Both signals that reach the counter from the energy-meter chip, the
// counted pulse and the count enable, pass through such a flip-flop clocked
// by the board's generator. The counter then sees a level only as it stood at
// a generator clock edge, so a disturbance between edges is never counted.
// This follows the counter schematic, where each input enters through a plain
// D flip-flop.
//
// Interface: clk is the generator clock, d the raw input, q the sampled copy.
// rst_n is an asynchronous active-low power-on reset that clears q; the
// schematic shows no reset on these flip-flops, and the reset is this
// design's own addition so that the counter starts from a known state.
//
// Timing: q takes the value of d at each rising edge of clk, one cycle of
// latency.
module input_fd (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d;
  end

endmodule
