// carry_delay_line: BEHAVIOURAL MODEL (not synthesizable) of the tapped
// delay line that the TDC builds from the dedicated carry chain of the FPGA.
//
// In the device every CARRY4 slice contributes four taps: the carry input
// ripples through four MUXCY stages and each stage output is caught by the
// slice's own flip-flop (FF0..FF3); COUT feeds the next slice. Here each tap
// is a transport delay of TAP_PS picoseconds, so on a uniform line an edge
// on `din` reaches taps[i] after (i+1)*TAP_PS. The default of 16 ps follows
// the measured bin width of about 16.1 ps (207 to 208 taps per 3.33 ns clock).
//
// By default every tap has the same delay. With UNEVEN = 1 the four taps of
// each slice get the uneven pattern of a CARRY4 slice instead: the simulated
// carry-in to FF0..FF3 delays of 33, 47, 81 and 104 ps, i.e. steps of
// 33/14/34/23, scaled so that a slice still takes 4 * TAP_PS (20/9/21/14 ps
// at the default). This reproduces the periodic in-slice non-linearity that
// the dithering calibration is meant to correct. The clock skew step the
// real device shows every 40 slices is not modelled; the uneven pattern is
// taken from the published slice simulation, its use here is this model's
// own choice.
//
// The line powers up at all ones, the input filter's reset value.
//
// Interface: din is the output of the input filter flip-flop; taps[i] goes
// to the sampling flip-flops. No clock.
module carry_delay_line #(
  parameter int unsigned NTAPS  = tdc_pkg::NTAPS,
  parameter int unsigned TAP_PS = 16,
  parameter bit          UNEVEN = 1'b0
) (
  input  logic             din,
  output logic [NTAPS-1:0] taps
);
  timeunit 1ps; timeprecision 1ps;

  logic chain [NTAPS];

  // Power-up: the line starts at its rest state of all ones, the value the
  // input filter takes during reset. Without this a model tap would keep a
  // random start value until the first edge passes it.
  initial
    for (int i = 0; i < NTAPS; i++) chain[i] = 1'b1;

  // delay into tap i: uniform, or the CARRY4 step pattern scaled to an
  // average of TAP_PS (step weights 33/14/34/23 out of 104 per slice)
  function automatic int unsigned tap_delay(input int unsigned i);
    int unsigned w;
    if (!UNEVEN) return TAP_PS;
    case (i % 4)
      0:       w = 33;
      1:       w = 14;
      2:       w = 34;
      default: w = 23;
    endcase
    return (w * 4 * TAP_PS + 52) / 104;
  endfunction

  localparam int unsigned D0 = tap_delay(0);
  always @(din) chain[0] <= #(D0) din;

  for (genvar i = 1; i < NTAPS; i++) begin : g_tap
    localparam int unsigned D = tap_delay(i);
    always @(chain[i-1]) chain[i] <= #(D) chain[i-1];
  end

  always_comb
    for (int i = 0; i < NTAPS; i++) taps[i] = chain[i];
endmodule
