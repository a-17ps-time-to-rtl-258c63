// thermo_encoder: converts the synchronized delay-line sample into a binary
// fine code, suppresses bubbles, and detects hits.
//
// Propagated bits. The encoder remembers tap 0 of the previous sample, `ref`.
// A tap whose value differs from `ref` carries an edge launched since the
// previous clock. Only the first `window` taps are searched, window being the
// number of taps per clock period from the automatic range adjustment: an
// edge launched during the last period cannot have gone further, and in Turbo
// mode the edge of the period before lies beyond it. The same rule works in
// normal mode, where the reset state is all ones and hits launch zeros.
//
// Bubbles. A tap caught while its input changed may resolve either way, so the
// pattern can hold isolated wrong bits. METHOD selects the suppression:
//   BUBBLE_FIRST_BIT (default) code = 1 + index of the furthest propagated bit;
//   BUBBLE_COUNT     code = number of propagated bits in the window.
// The description uses the first for its results; the second is kept as an
// option.
//
// One hit per frame: in normal mode the input filter launches a single edge
// per frame, so with one_per_frame high the encoder takes no further hit
// until arm drops at the frame's reset sample. This keeps the tail of the
// previous line state from being read as a hit while the window is still
// wider than the true clock period (before the range adjustment settled).
//
// Outputs, registered, one clock after the sample:
//   hit       arm && code > 0 (and no earlier hit in the frame when
//             one_per_frame): a measurement, one clock pulse per hit.
//   code      the fine code N(x) of this sample.
//   first     hit && N(x-1) == 0: a valid measurement for range adjustment.
//   full_code furthest tap in the whole line holding the polarity of the last
//             hit edge (1-based); the next cycle's value serves the range
//             measurement N(x+1).
//   full_sat  full_code == NT, i.e. that edge has left the line.
// The window search, the polarity tracking and the one-cycle latency are
// this design's choices.
module thermo_encoder #(
  parameter int unsigned NT = tdc_pkg::NTAPS,
  parameter int unsigned CW = tdc_pkg::CODE_W,
  parameter tdc_pkg::bubble_method_e METHOD = tdc_pkg::BUBBLE_FIRST_BIT
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [NT-1:0] samp,
  input  logic          arm,
  input  logic          one_per_frame,
  input  logic [CW-1:0] window,
  output logic          hit,
  output logic [CW-1:0] code,
  output logic          first,
  output logic [CW-1:0] full_code,
  output logic          full_sat
);
  timeunit 1ps; timeprecision 1ps;

  logic          ref_q;     // tap 0 of the previous sample
  logic          pol_q;     // polarity launched by the last detected hit
  logic          prev_nz;   // N(x-1) > 0
  logic          done_q;    // normal mode: this frame's hit was taken
  logic          take;
  logic [CW-1:0] nwin, nfull;

  always_comb begin
    nwin  = '0;
    nfull = '0;
    for (int i = 0; i < NT; i++) begin
      if (i < int'(window) && samp[i] != ref_q) begin
        if (METHOD == tdc_pkg::BUBBLE_COUNT) nwin = nwin + 1'b1;
        else                                 nwin = CW'(i + 1);
      end
      if (samp[i] == pol_q) nfull = CW'(i + 1);
    end
  end

  assign take = arm && !done_q && (nwin != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      done_q    <= 1'b0;
      ref_q     <= 1'b1;
      pol_q     <= 1'b0;
      prev_nz   <= 1'b0;
      hit       <= 1'b0;
      first     <= 1'b0;
      code      <= '0;
      full_code <= '0;
      full_sat  <= 1'b0;
    end else begin
      ref_q     <= samp[0];
      prev_nz   <= arm && (nwin != '0);
      hit       <= take;
      first     <= take && !prev_nz;
      done_q    <= one_per_frame && arm && (done_q || take);
      code      <= nwin;
      full_code <= nfull;
      full_sat  <= (nfull == CW'(NT));
      if (take) pol_q <= ~ref_q;
    end
  end
endmodule
