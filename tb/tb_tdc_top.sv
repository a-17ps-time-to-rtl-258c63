// tb_tdc_top: end-to-end test of the TDC at its default parameters.
//
// Hits are placed at known offsets from a clock edge so that the expected
// fine code is exact: a hit at d ps after edge e0 has travelled
// floor((T - d) / 16) taps of the 16 ps line when edge e0+T samples it, and
// is reported with the coarse count that follows edge e0+T. The test runs:
//   1. normal mode, linear interpolation: one hit per frame, plus hits in the
//      reset cycle and second hits in a frame, which must be dropped;
//   2. normal mode with the dithering table loaded: the output must lie in
//      the slots the hit's bin overlaps;
//   3. Turbo mode: hits in consecutive cycles, several per frame;
//   4. Turbo mode without reading: 70 hits into the 64-word FIFO -> overflow.
// It checks every FIFO word against the expectation queue, the range
// adjustment result (208 or 209 taps per 3334 ps period) and counts each
// mechanism, failing any that never happened.
module tb_tdc_top;
  timeunit 1ps; timeprecision 1ps;
  import tdc_pkg::*;

  localparam int HALF = 1667;
  localparam int T    = 2 * HALF;
  localparam int TAU  = 16;

  logic clk = 1'b0, rst = 1'b1, hit = 1'b0, turbo = 1'b0, cal_mode = 1'b0;
  logic dt_we = 1'b0, rd_en = 1'b0;
  logic [CODE_W-1:0] dt_addr = '0;
  logic [CAL_B+DITHER_F:0] dt_data = '0;
  tdc_word_t rd_data;
  logic empty, overflow, range_stb, interp_ready, interp_refill;
  logic [CODE_W-1:0] range_mean, range_raw, interp_n;

  tdc_top dut (.*);

  always #HALF clk = ~clk;

  int checks = 0, failures = 0;
  int m_normal = 0, m_reset_drop = 0, m_frame_drop = 0, m_turbo_multi = 0;
  int m_ara = 0, m_refill = 0, m_dither_upper = 0, m_overflow = 0, m_words = 0;

  // model of the free running coarse counter
  int unsigned tb_cnt = 0;
  always @(posedge clk) tb_cnt <= rst ? 0 : tb_cnt + 1;

  // expected words
  typedef struct { int unsigned coarse; int raw; int cal_lo; int cal_hi; } exp_t;
  exp_t q[$];

  // dithering boundary table as loaded (2^16 = one clock period)
  int unsigned bnd [NTAPS+1];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // reader: pops the FIFO whenever `reading` and compares with the queue
  bit reading = 1'b1;
  int unsigned last_frame = 32'hFFFF_FFFF;
  always @(negedge clk) rd_en <= reading && !empty;
  always @(posedge clk) if (rd_en && !rst) begin
    exp_t e;
    m_words++;
    if (q.size() == 0) check(1'b0, $sformatf("unexpected FIFO word coarse %0d raw %0d", rd_data.coarse, rd_data.raw));
    else begin
      e = q.pop_front();
      check(rd_data.coarse == e.coarse[COARSE_W-1:0],
            $sformatf("coarse %0d exp %0d", rd_data.coarse, e.coarse[COARSE_W-1:0]));
      check(int'(rd_data.raw) == e.raw, $sformatf("raw %0d exp %0d", rd_data.raw, e.raw));
      check(int'(rd_data.cal) >= e.cal_lo && int'(rd_data.cal) <= e.cal_hi,
            $sformatf("cal %0d exp %0d..%0d (raw %0d)", rd_data.cal, e.cal_lo, e.cal_hi, e.raw));
      if (cal_mode && int'(rd_data.cal) > e.cal_lo) m_dither_upper++;
      if (turbo && (rd_data.coarse >> FRAME_W) == last_frame) m_turbo_multi++;
      last_frame = rd_data.coarse >> FRAME_W;
    end
  end

  always @(posedge clk) begin
    if (range_stb) begin
      m_ara++;
      check(range_raw == 208 || range_raw == 209, $sformatf("range_raw %0d", range_raw));
    end
    if (interp_refill) m_refill++;
  end

  // one hit n taps before the next sampling edge; waits from edge e0
  task automatic hit_at(input int n, input bit expect_word);
    int unsigned c0;
    int d;
    exp_t e;
    @(posedge clk);
    #1;
    c0 = tb_cnt;
    d  = T - 8 - TAU * n;
    #(d - 1);
    hit = 1'b1;
    if (expect_word) begin
      e.coarse = c0 + 1;
      e.raw    = n;
      if (cal_mode) begin
        e.cal_lo = int'(bnd[n-1] >> DITHER_F) + 1;
        e.cal_hi = int'((bnd[n] - 1) >> DITHER_F) + 1;
      end else begin
        e.cal_lo = (n * 256) / int'(interp_n);
        e.cal_hi = e.cal_lo;
      end
      q.push_back(e);
    end
    #400 hit = 1'b0;
  endtask

  task automatic do_reset();
    @(negedge clk) rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
  endtask

  // move to the cycle whose counter value (after edge e0) has low bits k:
  // leaves time just before that edge
  task automatic wait_frame_pos(input int unsigned k);
    while (((tb_cnt + 1) % 16) != k) begin
      @(posedge clk);
      #1;
    end
  endtask

  task automatic drain();
    repeat (12) @(posedge clk);
    while (!empty) @(posedge clk);
    repeat (2) @(posedge clk);
    check(q.size() == 0, $sformatf("%0d expected words missing", q.size()));
    q.delete();
  endtask

  initial begin
    #(T * 200000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    do_reset();
    wait (interp_ready);
    check(interp_n == 208, $sformatf("initial table N %0d", interp_n));
    repeat (20) @(posedge clk);

    // 1. normal mode, linear interpolation
    for (int f = 0; f < 40; f++) begin
      automatic int unsigned pos = $urandom_range(0, 14);
      wait_frame_pos(0);
      wait_frame_pos(pos);
      n = $urandom_range(1, 207);
      hit_at(n, 1'b1);
      m_normal++;
      if (pos < 13 && (f % 3 == 0)) begin
        hit_at($urandom_range(1, 207), 1'b0);  // second hit in the frame
        m_frame_drop++;
      end
      if (f % 5 == 0) begin                    // hit during the reset cycle
        wait_frame_pos(15);
        hit_at($urandom_range(1, 207), 1'b0);
        m_reset_drop++;
      end
    end
    drain();
    check(range_mean == 208 || range_mean == 209, $sformatf("range_mean %0d", range_mean));

    // 2. dithering with a uniform table of 208 bins
    for (int c = 0; c <= NTAPS; c++) begin
      bnd[c] = (c >= 208) ? 32'h1_0000 : (c * 32'h1_0000) / 208;
      @(negedge clk);
      dt_we = 1'b1; dt_addr = CODE_W'(c); dt_data = bnd[c][CAL_B+DITHER_F:0];
    end
    @(negedge clk) dt_we = 1'b0;
    cal_mode = 1'b1;
    for (int f = 0; f < 40; f++) begin
      wait_frame_pos(0);
      wait_frame_pos($urandom_range(0, 14));
      hit_at($urandom_range(1, 207), 1'b1);
    end
    drain();
    cal_mode = 1'b0;

    // 3. Turbo mode, hits in consecutive cycles
    turbo = 1'b1;
    do_reset();
    wait (interp_ready);
    repeat (20) @(posedge clk);
    for (int k = 0; k < 120; k++) begin
      hit_at($urandom_range(1, 207), 1'b1);
      if (k % 7 == 6) repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    drain();

    // 4. Turbo mode burst into a stopped FIFO
    reading = 1'b0;
    for (int k = 0; k < 70; k++) hit_at($urandom_range(1, 207), k < 64);
    repeat (10) @(posedge clk);
    check(overflow, "overflow flag after 70 words");
    if (overflow) m_overflow++;
    reading = 1'b1;
    drain();

    check(m_normal > 0, "normal-mode measurements");
    check(m_reset_drop > 0 && m_frame_drop > 0, "hits dropped in reset cycle / same frame");
    check(m_turbo_multi > 0, "several Turbo hits in one frame");
    check(m_ara > 0, "range adjustment measurements");
    check(m_refill > 0, "interpolation table refills");
    check(m_dither_upper > 0, "dithering to the upper slot");
    check(m_overflow > 0, "FIFO overflow");
    $display("mechanisms: normal=%0d reset_drop=%0d frame_drop=%0d turbo_multi=%0d ara=%0d refill=%0d dither_upper=%0d overflow=%0d words=%0d",
             m_normal, m_reset_drop, m_frame_drop, m_turbo_multi, m_ara, m_refill,
             m_dither_upper, m_overflow, m_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
