// tap_sampler: latches the state of the delay line on every clock and passes
// it through a three-stage synchronizer.
//
// Stage 1 is the row of flip-flops next to the carry chain; stages 2 and 3
// give a tap that went metastable two more clock periods to resolve. In
// normal mode the controller pulses `clr` in the frame's reset cycle, which
// loads stage 1 with the line's rest state (all ones); in Turbo mode `clr`
// stays low and the flip-flops are never reset.
//
// Downsampling: with DS > 1 only every DS-th tap is kept (the last tap of
// each group), trading resolution for linearity. DS = 1 uses all four taps
// of every slice, the main configuration; DS = 2 and 4 give 2 and 1 taps per
// slice.
//
// Timing: the sample seen on q was taken SYNC_STAGES-1 clocks before.
module tap_sampler #(
  parameter int unsigned NTAPS  = tdc_pkg::NTAPS,
  parameter int unsigned DS     = 1,
  parameter int unsigned STAGES = tdc_pkg::SYNC_STAGES,
  localparam int unsigned NOUT  = NTAPS / DS
) (
  input  logic             clk,
  input  logic             clr,
  input  logic [NTAPS-1:0] taps,
  output logic [NOUT-1:0]  q
);
  timeunit 1ps; timeprecision 1ps;

  logic [NOUT-1:0] sel;
  logic [NOUT-1:0] stage [STAGES];

  always_comb
    for (int i = 0; i < NOUT; i++) sel[i] = taps[i*DS + DS - 1];

  always_ff @(posedge clk) begin
    stage[0] <= clr ? '1 : sel;
    for (int s = 1; s < STAGES; s++) stage[s] <= stage[s-1];
  end

  assign q = stage[STAGES-1];

  initial assert (STAGES >= 1 && DS >= 1 && NTAPS % DS == 0)
    else $error("tap_sampler: bad parameters");
endmodule
