// ara: automatic range adjustment. Measures, while the TDC is running, how
// many taps of the delay line one clock period spans, and keeps a running
// mean of it.
//
// A measurement N(x) is valid when N(x) > 0 and N(x-1) = 0 (the encoder's
// `first`). The sample one clock later shows the same edge one period
// further down the line; if it has not yet left the line (N(x+1) != NMAX),
// N(x+1) - N(x) is the number of taps per clock period, and the LSB is
// T / (N(x+1) - N(x)). This rule is the one of the design description.
//
// The running mean is an exponential average with weight 2**-AVG_SHIFT,
// held with AVG_SHIFT fraction bits and rounded on output; it starts at
// RANGE_INIT. The averaging method and its weight are this design's choice.
//
// Interface: the encoder outputs first/code for sample x and, one clock
// later, full_code/full_sat for sample x+1. range_stb pulses for one clock
// with range_raw when a range measurement was taken (the values histogrammed
// by the code density test); range_mean is the rounded mean, in taps.
module ara #(
  parameter int unsigned NT         = tdc_pkg::NTAPS,
  parameter int unsigned CW         = tdc_pkg::CODE_W,
  parameter int unsigned RANGE_INIT = tdc_pkg::RANGE_INIT,
  parameter int unsigned AVG_SHIFT  = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          first,
  input  logic [CW-1:0] code,
  input  logic [CW-1:0] full_code,
  input  logic          full_sat,
  output logic          range_stb,
  output logic [CW-1:0] range_raw,
  output logic [CW-1:0] range_mean
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned AW = CW + AVG_SHIFT;

  logic          pend;
  logic [CW-1:0] n_x;
  logic [AW-1:0] acc;
  logic [CW-1:0] diff;
  logic          take;

  assign diff = full_code - n_x;
  assign take = pend && !full_sat && (full_code > n_x);

  // rounded mean; subtracting the rounded (not the truncated) mean keeps the
  // average free of a half-LSB bias
  logic [AW:0] rounded;
  assign rounded = ({1'b0, acc} + (AW+1)'(1 << (AVG_SHIFT - 1))) >> AVG_SHIFT;

  always_ff @(posedge clk) begin
    if (rst) begin
      pend      <= 1'b0;
      n_x       <= '0;
      acc       <= AW'(RANGE_INIT) << AVG_SHIFT;
      range_stb <= 1'b0;
      range_raw <= '0;
    end else begin
      pend      <= first;
      n_x       <= code;
      range_stb <= take;
      if (take) begin
        range_raw <= diff;
        acc       <= acc - AW'(rounded) + AW'(diff);
      end
    end
  end

  // clamp to [1, NT]
  assign range_mean = (rounded == '0) ? CW'(1)
                    : (rounded > (AW+1)'(NT)) ? CW'(NT) : CW'(rounded);
endmodule
