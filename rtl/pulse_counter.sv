// pulse_counter: the logic programmed into the CPLD of the meter, a six-digit
// decimal counter of energy pulses.
//
// The energy-meter chip emits one pulse per quantum of energy on COUNT PULSE
// and holds COUNT ENABLE high while counting is allowed. Each of the two lines
// is sampled by a D flip-flop (input_fd) on the generator clock, which keeps
// noise between clock edges from being counted. The sampled enable is the
// common count enable of all digits. The sampled pulse advances the lowest
// digit; each digit (bcd_decade) advances the next one when it passes from 9
// to 0, so the digits form a decimal counter from 000000 to 999999 that wraps
// to 000000. This chain of six decades behind two input flip-flops follows
// the counter schematic.
//
// Departure from the schematic: there the sampled pulse is itself the clock
// of the lowest digit and each digit's 9-to-10 detector clocks the next, a
// ripple counter. Here everything runs on the generator clock; a third
// flip-flop keeps the previous sampled pulse level, and a rising edge of the
// sampled pulse (high now, low one cycle before) is the count event. Counting
// therefore happens one generator cycle after the edge at which the pulse is
// first sampled high, one cycle later than in the ripple form. A pulse must
// be high at one generator edge and low at a later one to be counted once.
// Both the enable and the pulse are sampled on the same clock: the schematic
// names their clocks CLOCK 1 and CLOCK 2, and both come from the generator.
//
// Interface:
//   clk           generator clock (CLOCK 1 / CLOCK 2)
//   rst_n         asynchronous active-low power-on reset: the count starts
//                 from zero, as it does after a supply interruption
//   count_pulse   pulse line of the energy-meter chip
//   count_enable  enable line of the energy-meter chip (REVP), high = count
//   digits        digits[0] is the least significant digit, each Q3..Q0
// Timing: a pulse whose rising edge is first sampled at clk edge k is in
// digits after clk edge k+1, if count_enable was sampled high at edge k.
module pulse_counter
  import counter_pkg::*;
#(
  parameter int unsigned N_DIGITS = N_DIGITS_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 count_pulse,
  input  logic                 count_enable,
  output bcd_t [N_DIGITS-1:0]  digits
);

  logic pulse_q;     // sampled COUNT PULSE
  logic pulse_prev;  // sampled COUNT PULSE one cycle earlier
  logic enable_q;    // sampled COUNT ENABLE
  logic count_event;

  input_fd u_fd_pulse  (.clk(clk), .rst_n(rst_n), .d(count_pulse),  .q(pulse_q));
  input_fd u_fd_enable (.clk(clk), .rst_n(rst_n), .d(count_enable), .q(enable_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pulse_prev <= 1'b0;
    else        pulse_prev <= pulse_q;
  end

  assign count_event = pulse_q & ~pulse_prev;

  // carry[i] advances digit i; carry[N_DIGITS] is the wrap of the whole
  // counter, which, as in the schematic, goes nowhere.
  logic [N_DIGITS:0] carry;
  assign carry[0] = count_event;

  for (genvar i = 0; i < N_DIGITS; i++) begin : g_decade
    bcd_decade u_decade (
      .clk   (clk),
      .rst_n (rst_n),
      .ce    (enable_q),
      .inc   (carry[i]),
      .q     (digits[i]),
      .carry (carry[i+1])
    );
  end

endmodule
