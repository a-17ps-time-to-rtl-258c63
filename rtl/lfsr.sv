// lfsr: 16-bit Galois linear feedback shift register used as the
// pseudorandom source of the bin dithering. Taps x^16+x^14+x^13+x^11+1
// (maximal length, period 65535). It advances on every clock where `en` is
// high; reset loads SEED, which must not be zero. The polynomial and seed are
// this design's choices; the description only asks for a pseudorandom (or
// true random) number generator.
module lfsr #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  output logic [15:0] value
);
  timeunit 1ps; timeprecision 1ps;

  always_ff @(posedge clk)
    if (rst)     value <= SEED;
    else if (en) value <= (value >> 1) ^ (value[0] ? 16'hB400 : 16'h0000);
endmodule
