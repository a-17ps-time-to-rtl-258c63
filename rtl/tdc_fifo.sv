// tdc_fifo: synchronous first-word-fall-through FIFO that buffers the TDC's
// coarse and fine values for external readout.
//
// The head word is always visible on rd_data while empty is low; rd_en pops
// it. A write while the FIFO is full is dropped and sets the sticky
// `overflow` flag (cleared by rst). A write and a read in the same clock are
// both performed. Depth, width and the overflow policy are this design's
// choices; the description only names the FIFO.
module tdc_fifo #(
  parameter int unsigned WIDTH = tdc_pkg::WORD_W,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic             overflow,
  output logic [AW:0]      count
);
  timeunit 1ps; timeprecision 1ps;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_rd = rd_en && !empty;
  assign do_wr = wr_en && (!full || do_rd);
  assign rd_data = mem[rptr];

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) begin
        mem[wptr] <= wr_data;
        wptr      <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      end
      if (do_rd) rptr <= (rptr == AW'(DEPTH-1)) ? '0 : rptr + 1'b1;
      if (wr_en && !do_wr) overflow <= 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  a_count_bound: assert property (@(posedge clk) disable iff (rst) count <= (AW+1)'(DEPTH));
  a_no_wr_full:  assert property (@(posedge clk) disable iff (rst) full && !do_rd |-> !do_wr);
endmodule
