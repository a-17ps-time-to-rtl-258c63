// tb_tdc_workloads: the measurements the TDC is characterised with, run on
// four builds of tdc_top that share one clock and one hit input:
//   u[0] default: 16 ps taps, all four taps per slice;
//   u[1] downsampling by 4 (one tap per slice);
//   u[2] downsampling by 2 (two taps per slice);
//   u[3] slow corner: 26 ps taps (128 taps per clock period) - the range
//        adjustment must move from its start value of 208 to 128 and the
//        interpolation table must be rebuilt.
// Phase 1 is a statistical code density test: hits at random times, one per
// frame in normal mode; every word is checked against the exact expectation
// and the DNL / INL of u[0] are printed. Phase 2 repeats one fixed hit delay
// (the cable-delay test): every build must return the same code each time.
module tb_tdc_workloads;
  timeunit 1ps; timeprecision 1ps;
  import tdc_pkg::*;

  localparam int HALF = 1667;
  localparam int T    = 2 * HALF;
  localparam int NB   = 4;
  localparam int TAPS [NB] = '{16, 16, 16, 26};
  localparam int DSV  [NB] = '{1, 4, 2, 1};
  localparam int HITS = 800;

  logic clk = 1'b0, rst = 1'b1, hit = 1'b0;
  always #HALF clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned tb_cnt = 0;
  always @(posedge clk) tb_cnt <= rst ? 0 : tb_cnt + 1;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  typedef struct { int unsigned coarse; int raw; int n; bit check_cal; } exp_t;

  // the table may have been rebuilt for N +- 1 between hit and look-up
  function automatic bit cal_match(input int cal, input int raw, input int n);
    for (int m = n - 1; m <= n + 1; m++)
      if (cal == ((raw >= m) ? 256 : (raw * 256) / m)) return 1'b1;
    return 1'b0;
  endfunction
  exp_t q [NB][$];
  logic [CODE_W-1:0] interp_n [NB], range_mean [NB];
  int refills [NB];
  int hist [NTAPS+1];
  int fixed_code [NB];
  bit fixed_phase = 1'b0;
  bit cal_ok = 1'b0;

  for (genvar b = 0; b < NB; b++) begin : g_b
    tdc_word_t rd_data;
    logic empty, overflow, range_stb, ready, refill, rd_en;
    logic [CODE_W-1:0] range_raw;

    tdc_top #(.TAP_PS(TAPS[b]), .DS(DSV[b])) u (
      .clk, .rst, .hit, .turbo(1'b0), .cal_mode(1'b0),
      .dt_we(1'b0), .dt_addr('0), .dt_data('0),
      .rd_en, .rd_data, .empty, .overflow,
      .range_mean(range_mean[b]), .range_stb, .range_raw,
      .interp_ready(ready), .interp_refill(refill), .interp_n(interp_n[b]));

    always @(negedge clk) rd_en <= !empty;
    always @(posedge clk) begin
      if (refill) refills[b]++;
      if (rd_en && !rst) begin
        if (q[b].size() == 0) chk(1'b0, $sformatf("build %0d: unexpected word", b));
        else begin
          automatic exp_t e = q[b].pop_front();
          chk(rd_data.coarse == e.coarse[COARSE_W-1:0] && int'(rd_data.raw) == e.raw,
              $sformatf("build %0d: coarse/raw %0d/%0d exp %0d/%0d", b,
                        rd_data.coarse, rd_data.raw, e.coarse[COARSE_W-1:0], e.raw));
          if (e.check_cal)
            chk(cal_match(int'(rd_data.cal), e.raw, e.n),
                $sformatf("build %0d: cal %0d for raw %0d, N %0d", b, rd_data.cal, e.raw, e.n));
          if (b == 0 && !fixed_phase) hist[rd_data.raw]++;
          if (fixed_phase) begin
            if (fixed_code[b] < 0) fixed_code[b] = int'(rd_data.raw);
            chk(int'(rd_data.raw) == fixed_code[b], $sformatf("build %0d: fixed delay code moved", b));
          end
        end
      end
    end
  end

  task automatic wait_frame_pos(input int unsigned k);
    while (((tb_cnt + 1) % 16) != k) begin
      @(posedge clk);
      #1;
    end
  endtask

  // hit d ps after the next clock edge
  task automatic hit_after_edge(input int d);
    int unsigned c0;
    @(posedge clk);
    #1;
    c0 = tb_cnt;
    #(d - 1);
    hit = 1'b1;
    for (int b = 0; b < NB; b++) begin
      automatic exp_t e;
      automatic int n = (T - d) / TAPS[b];
      e.coarse = c0 + 1;
      e.raw    = n / DSV[b];
      e.check_cal = cal_ok || b != 3;
      e.n      = int'(interp_n[b]);
      q[b].push_back(e);
    end
    #400 hit = 1'b0;
  endtask

  initial begin
    #(longint'(T) * 60000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real dnl, dmin, dmax, inl, imin, imax, nbar;
    int total;
    for (int b = 0; b < NB; b++) fixed_code[b] = -1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    wait (g_b[0].ready && g_b[1].ready && g_b[2].ready && g_b[3].ready);
    repeat (20) @(posedge clk);

    // phase 1: code density test
    for (int h = 0; h < HITS; h++) begin
      automatic int d;
      // no hit exactly on a tap boundary of either line
      do d = $urandom_range(1, T - 70);
      while ((T - d) % 16 == 0 || (T - d) % 26 == 0);
      if (h == HITS / 2) begin
        // the slow build has adapted by now: check its calibrated codes too
        chk(interp_n[3] == 128 || interp_n[3] == 129, $sformatf("slow corner table N %0d", interp_n[3]));
        cal_ok = 1'b1;
      end
      wait_frame_pos(0);
      wait_frame_pos($urandom_range(0, 14));
      hit_after_edge(d);
    end
    repeat (20) @(posedge clk);
    for (int b = 0; b < NB; b++) chk(q[b].size() == 0, $sformatf("build %0d: words missing", b));

    // phase 2: fixed delay
    fixed_phase = 1'b1;
    for (int h = 0; h < 50; h++) begin
      wait_frame_pos(0);
      wait_frame_pos($urandom_range(0, 14));
      hit_after_edge(1234);
    end
    repeat (20) @(posedge clk);
    for (int b = 0; b < NB; b++) chk(q[b].size() == 0, $sformatf("build %0d: words missing", b));

    // range adjustment results: taps per 3334 ps period, rounded
    // (3334 / 16 = 208.4 taps; the rounded running mean may sit one above)
    chk(range_mean[0] inside {208, 209}, $sformatf("range 4 taps/slice %0d", range_mean[0]));
    chk(range_mean[1] inside {52, 53},   $sformatf("range 1 tap/slice %0d", range_mean[1]));
    chk(range_mean[2] inside {104, 105}, $sformatf("range 2 taps/slice %0d", range_mean[2]));
    chk(range_mean[3] inside {128, 129}, $sformatf("range slow corner %0d", range_mean[3]));
    chk(refills[3] >= 2, "slow corner table rebuilt");

    // DNL / INL of the default build over codes 1..207
    total = 0;
    for (int c = 1; c <= 207; c++) total += hist[c];
    nbar = real'(total) / 207.0;
    inl = 0.0; dmin = 1e9; dmax = -1e9; imin = 1e9; imax = -1e9;
    for (int c = 1; c <= 207; c++) begin
      dnl = real'(hist[c]) / nbar - 1.0;
      inl += dnl;
      if (dnl < dmin) dmin = dnl;
      if (dnl > dmax) dmax = dnl;
      if (inl < imin) imin = inl;
      if (inl > imax) imax = inl;
    end
    $display("code density: %0d hits, DNL [%0.2f, %0.2f] INL [%0.2f, %0.2f] LSB", total, dmin, dmax, imin, imax);
    $display("ranges: %0d %0d %0d %0d, refills of slow build: %0d", range_mean[0], range_mean[1],
             range_mean[2], range_mean[3], refills[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
