// coarse_rst_ctrl: free running coarse counter and the frame / reset control
// of the TDC.
//
// The coarse counter counts clock periods. Its low FRAME_W bits split time
// into frames of 2**FRAME_W = 16 cycles. In normal mode the last cycle of
// every frame (low bits = 15) resets the input filter and the sampling
// flip-flops, so the line is back at its rest state of all ones when the
// next frame starts; hits may arrive in the other 15 cycles (a 50 ns range at
// 300 MHz). In Turbo mode nothing is reset and every cycle is usable.
//
// Outputs:
//   cnt      the counter, incremented on every clock after reset.
//   line_rst registered, high for the whole reset cycle (and during rst);
//            asynchronous reset of the input filter flip-flop.
//   samp_clr high during the reset cycle; stage 1 of the sampler loads all
//            ones at the edge that ends it.
//   tag/arm  the counter value that was current right after the sampling edge
//            of the sample now leaving the synchronizer (TAG_LAT clocks of
//            delay), and whether that sample may carry a measurement: not
//            the sample taken at the end of the reset cycle (normal mode).
// The counter width and this exact alignment of the reset cycle are this
// design's choices; the 16-cycle frame with one reset cycle follows the
// design description.
module coarse_rst_ctrl #(
  parameter int unsigned COARSE_W = tdc_pkg::COARSE_W,
  parameter int unsigned FRAME_W  = tdc_pkg::FRAME_W,
  parameter int unsigned TAG_LAT  = tdc_pkg::SYNC_STAGES - 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                turbo,
  output logic [COARSE_W-1:0] cnt,
  output logic                line_rst,
  output logic                samp_clr,
  output logic [COARSE_W-1:0] tag,
  output logic                arm
);
  timeunit 1ps; timeprecision 1ps;

  localparam logic [FRAME_W-1:0] LAST = '1;

  logic [COARSE_W-1:0] cnt_next;
  logic [COARSE_W-1:0] tag_pipe [TAG_LAT+1];

  assign cnt_next = cnt + 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      line_rst <= 1'b1;
    end else begin
      cnt      <= cnt_next;
      line_rst <= !turbo && (cnt_next[FRAME_W-1:0] == LAST);
    end
  end

  assign samp_clr = line_rst;

  always_comb tag_pipe[0] = cnt;
  for (genvar i = 1; i <= TAG_LAT; i++) begin : g_tag
    always_ff @(posedge clk) tag_pipe[i] <= rst ? '0 : tag_pipe[i-1];
  end

  assign tag = tag_pipe[TAG_LAT];
  assign arm = turbo || (tag[FRAME_W-1:0] != '0);
endmodule
