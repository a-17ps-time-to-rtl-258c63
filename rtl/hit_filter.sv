// hit_filter: the input filter flip-flop that launches the hit into the
// delay line.
//
// The flip-flop is clocked by the hit signal itself, so the time of the
// hit edge becomes the time of an edge at the head of the line.
//   * Normal mode: the flip-flop is held at 1 by line_rst (the line's rest
//     state is all ones); the first hit after the reset loads a 0, which then
//     ripples down the line. Later hits in the same frame change nothing, so
//     one measurement is made per frame.
//   * Turbo mode: the flip-flop toggles on every hit (D = not Q), so ones and
//     zeros are launched alternately and the line never needs a reset.
// Both behaviours follow the two architectures of the design. Having them in
// one flip-flop with a `turbo` select is this implementation's choice, so one
// build can run either mode.
//
// Interface: hit (asynchronous), line_rst (asynchronous, active high; the
// controller drives it for one clock per frame in normal mode and during the
// global reset), q to the head of the delay line.
module hit_filter (
  input  logic hit,
  input  logic turbo,
  input  logic line_rst,
  output logic q
);
  timeunit 1ps; timeprecision 1ps;

  always_ff @(posedge hit or posedge line_rst)
    if (line_rst) q <= 1'b1;
    else          q <= turbo ? ~q : 1'b0;
endmodule
