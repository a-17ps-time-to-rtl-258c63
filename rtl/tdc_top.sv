// tdc_top: pipelined interpolating time-to-digital converter with a carry
// chain fine delay line, a free running coarse counter, digital calibration
// and a readout FIFO.
//
// Data path, one clock per stage:
//   hit -> hit_filter -> carry_delay_line (NTAPS taps, behavioural model of
//   the carry chain) -> tap_sampler (sampling flip-flops + 3-stage
//   synchronizer, optional downsampling) -> thermo_encoder (bubble-tolerant
//   thermometer-to-binary, hit detection) -> interp_map (linear table) or
//   dither_map (code density based dithering) -> tdc_fifo.
// Calibration: ara measures the taps per clock period from the running
// measurements; that value is the encoder's search window and the N of the
// linear interpolation table, which is recomputed when it changes.
//
// Modes (input `turbo`): normal mode uses 16-cycle frames whose last cycle
// resets the line, one hit per frame, 50 ns range; Turbo mode toggles the
// input filter so the line never needs a reset and a hit can be taken in
// every clock cycle. The original design builds the two modes as separate
// implementations; selecting them at run time is this design's choice.
//
// FIFO word (tdc_pkg::tdc_word_t): coarse = counter value just after the
// clock edge that sampled the hit, raw = taps the edge had travelled by then,
// cal = calibrated code in ]0, 2^CAL_B]. The hit time is therefore
// coarse * T - raw * tau (or - cal * T / 2^CAL_B), counted from the clock edge
// at which the counter was 0. The word is written 5 clocks after that
// sampling edge.
//
// TAP_PS and UNEVEN only set the behavioural delay line (tap delay, and the
// uneven in-slice delay pattern); they have no hardware meaning.
//
// cal_mode: 0 = linear interpolation, 1 = dithering (the host must first load
// the boundary table through dt_*).
//
// The hit is deliberately asynchronous: it clocks hit_filter, whose
// asynchronous line reset comes from the clk domain, and it enters the clk
// domain only through the tap_sampler synchronizer. The FIFO's full and
// count outputs are left open because overflow is reported instead.
module tdc_top #(
  parameter int unsigned NTAPS      = tdc_pkg::NTAPS,
  parameter int unsigned TAP_PS     = 16,
  parameter bit          UNEVEN     = 1'b0,
  parameter int unsigned DS         = 1,
  parameter tdc_pkg::bubble_method_e METHOD = tdc_pkg::BUBBLE_FIRST_BIT,
  parameter int unsigned FIFO_DEPTH = 64,
  localparam int unsigned CW = tdc_pkg::CODE_W,
  localparam int unsigned NT = NTAPS / DS,
  localparam int unsigned BW = tdc_pkg::CAL_B + tdc_pkg::DITHER_F + 1
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      hit,
  input  logic                      turbo,
  input  logic                      cal_mode,
  // dithering boundary table
  input  logic                      dt_we,
  input  logic [CW-1:0]             dt_addr,
  input  logic [BW-1:0]             dt_data,
  // readout
  input  logic                      rd_en,
  output tdc_pkg::tdc_word_t        rd_data,
  output logic                      empty,
  output logic                      overflow,
  // calibration status
  output logic [CW-1:0]             range_mean,
  output logic                      range_stb,
  output logic [CW-1:0]             range_raw,
  output logic                      interp_ready,
  output logic                      interp_refill,
  output logic [CW-1:0]             interp_n
);
  timeunit 1ps; timeprecision 1ps;
  import tdc_pkg::*;

  logic                line_rst, samp_clr, arm;
  logic [COARSE_W-1:0] cnt, tag;
  logic                filt_q;
  logic [NTAPS-1:0]    taps;
  logic [NT-1:0]       samp;

  // cnt itself is not needed here: the FIFO takes the delayed copy `tag`.
  coarse_rst_ctrl u_ctrl (
    .clk, .rst, .turbo, .cnt, .line_rst, .samp_clr, .tag, .arm
  );

  hit_filter u_filter (.hit, .turbo, .line_rst, .q(filt_q));

  carry_delay_line #(.NTAPS(NTAPS), .TAP_PS(TAP_PS), .UNEVEN(UNEVEN)) u_line (
    .din(filt_q), .taps
  );

  tap_sampler #(.NTAPS(NTAPS), .DS(DS)) u_samp (
    .clk, .clr(samp_clr), .taps, .q(samp)
  );

  // encoder
  logic          e_hit, e_first, e_full_sat;
  logic [CW-1:0] e_code, e_full;
  logic [COARSE_W-1:0] e_tag;

  thermo_encoder #(.NT(NT), .CW(CW), .METHOD(METHOD)) u_enc (
    .clk, .rst, .samp, .arm, .one_per_frame(!turbo), .window(range_mean),
    .hit(e_hit), .code(e_code), .first(e_first),
    .full_code(e_full), .full_sat(e_full_sat)
  );

  always_ff @(posedge clk) e_tag <= tag;

  ara #(.NT(NT), .CW(CW), .RANGE_INIT(RANGE_INIT / DS)) u_ara (
    .clk, .rst, .first(e_first), .code(e_code), .full_code(e_full),
    .full_sat(e_full_sat), .range_stb, .range_raw, .range_mean
  );

  // calibration
  logic             li_valid, di_valid;
  logic [CAL_W-1:0] li_cal, di_cal;
  logic [CW-1:0]    c_raw;
  logic [COARSE_W-1:0] c_tag;

  interp_map #(.NT(NT), .CW(CW), .B(CAL_B)) u_interp (
    .clk, .rst, .n_range(range_mean), .lk_valid(e_hit), .lk_code(e_code),
    .out_valid(li_valid), .out_cal(li_cal), .ready(interp_ready),
    .refill_done(interp_refill), .cur_n(interp_n)
  );

  dither_map #(.NT(NT), .CW(CW), .B(CAL_B), .F(DITHER_F)) u_dither (
    .clk, .rst, .wr_en(dt_we), .wr_addr(dt_addr), .wr_data(dt_data),
    .lk_valid(e_hit), .lk_code(e_code), .out_valid(di_valid), .out_cal(di_cal)
  );

  always_ff @(posedge clk) begin
    c_raw <= e_code;
    c_tag <= e_tag;
  end

  tdc_word_t w;
  assign w.coarse = c_tag;
  assign w.raw    = c_raw;
  assign w.cal    = cal_mode ? di_cal : li_cal;

  tdc_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .wr_en(cal_mode ? di_valid : li_valid), .wr_data(w),
    .rd_en, .rd_data, .empty, .full(), .overflow, .count()
  );

  initial assert (NT < (1 << CW)) else $error("tdc_top: NTAPS too large for CODE_W");
endmodule
