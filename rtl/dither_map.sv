// dither_map: pseudorandom bin dithering. Maps a raw fine code onto the
// calibrated output interval ]0, 2^B] using the bin widths measured by a
// statistical code density test.
//
// The clock period is laid out as a line of 2^B output slots. Raw bin c
// occupies the interval [bnd[c-1], bnd[c]) of that line, its length being
// proportional to how often code c occurred in the density test. A bin that
// overlaps several slots is sent to each of them with a probability equal to
// the share of the bin that falls in it: a pseudorandom fraction u in [0, 1)
// picks the point bnd[c-1] + u * (bnd[c] - bnd[c-1]) and the slot holding it
// is the output. This follows the design description; the fixed-point layout
// is this design's choice.
//
// Boundary table: NT+1 entries, entry c = cumulative width of bins 1..c in
// slots, with F fraction bits (so entry N = 2^B * 2^F). Entry 0 must be 0. It
// is written by the host through wr_* after it has run the density test; the
// table is not reset.
//
// Interface: lk_valid/lk_code (code 1..NT) look up; out_valid/out_cal
// (1..2^B, 0 for code 0) follow one clock later.
module dither_map #(
  parameter int unsigned NT = tdc_pkg::NTAPS,
  parameter int unsigned CW = tdc_pkg::CODE_W,
  parameter int unsigned B  = tdc_pkg::CAL_B,
  parameter int unsigned F  = tdc_pkg::DITHER_F,
  localparam int unsigned BW = B + F + 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          wr_en,
  input  logic [CW-1:0] wr_addr,
  input  logic [BW-1:0] wr_data,
  input  logic          lk_valid,
  input  logic [CW-1:0] lk_code,
  output logic          out_valid,
  output logic [B:0]    out_cal
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned RW = 8;  // bits of the random fraction

  logic [BW-1:0] bnd [NT+1];
  logic [15:0]   rnd;
  logic [CW-1:0] c_hi, c_lo;
  logic [BW-1:0] lo, hi, width, pos;
  logic [BW+RW-1:0] prod;
  logic [B:0]    slot;

  lfsr u_lfsr (.clk(clk), .rst(rst), .en(1'b1), .value(rnd));

  always_ff @(posedge clk)
    if (wr_en && wr_addr <= CW'(NT)) bnd[wr_addr] <= wr_data;

  always_comb begin
    c_hi  = (lk_code > CW'(NT)) ? CW'(NT) : lk_code;
    c_lo  = (c_hi == '0) ? '0 : c_hi - 1'b1;
    lo    = bnd[c_lo];
    hi    = bnd[c_hi];
    width = (hi > lo) ? hi - lo : '0;
    prod  = (BW+RW)'(width) * (BW+RW)'(rnd[RW-1:0]);
    pos   = lo + BW'(prod >> RW);
    slot  = (B+1)'(pos >> F) + 1'b1;
  end

  always_ff @(posedge clk) begin
    out_valid <= lk_valid && !rst;
    if (lk_code == '0)                 out_cal <= '0;
    else if (slot > ((B+1)'(1) << B))  out_cal <= (B+1)'(1) << B;
    else                               out_cal <= slot;
  end
endmodule
