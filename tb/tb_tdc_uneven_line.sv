// tb_tdc_uneven_line: code density test and dithering calibration on a line
// with uneven taps inside each slice (carry_delay_line UNEVEN = 1: 20, 9, 21
// and 14 ps, 64 ps per slice, the same 208 taps per clock period).
//
// Phase 1, linear interpolation: random hits, one per frame. Every word's
// coarse and raw code are checked against the cumulative tap arrival times,
// the linear code against floor(raw * 256 / N). The histogram of raw codes
// must show the in-slice pattern: the share of codes c with c mod 4 = k is the
// delay of tap k of a slice over 64 ps.
// Phase 2, dithering: the boundary table is built from the phase 1 histogram
// (entry c = cumulative count of codes 1..c scaled to 256 slots with 8
// fraction bits) and loaded; the same random hits are repeated with
// cal_mode = 1. Every dithered code must lie in the slots the raw code's bin
// covers. A linear table leaves 2^8 - 208 output slots that no code can
// reach; dithering must leave (almost) none empty.
module tb_tdc_uneven_line;
  timeunit 1ps; timeprecision 1ps;
  import tdc_pkg::*;

  localparam int HALF = 1667;
  localparam int T    = 2 * HALF;
  localparam int HITS = 1500;
  localparam int W [4] = '{20, 9, 21, 14};   // tap delays inside a slice

  logic clk = 1'b0, rst = 1'b1, hit = 1'b0, cal_mode = 1'b0;
  logic dt_we = 1'b0, rd_en = 1'b0;
  logic [CODE_W-1:0] dt_addr = '0;
  logic [CAL_B+DITHER_F:0] dt_data = '0;
  tdc_word_t rd_data;
  logic empty, overflow, range_stb, ready, refill;
  logic [CODE_W-1:0] range_mean, range_raw, interp_n;

  always #HALF clk = ~clk;

  tdc_top #(.UNEVEN(1'b1)) dut (
    .clk, .rst, .hit, .turbo(1'b0), .cal_mode,
    .dt_we, .dt_addr, .dt_data,
    .rd_en, .rd_data, .empty, .overflow,
    .range_mean, .range_stb, .range_raw,
    .interp_ready(ready), .interp_refill(refill), .interp_n);

  int checks = 0, failures = 0;
  int unsigned tb_cnt = 0;
  always @(posedge clk) tb_cnt <= rst ? 0 : tb_cnt + 1;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // arrival time of the edge at tap i, measured from the hit
  function automatic int arrival(input int i);
    int a = 64 * (i / 4);
    for (int k = 0; k <= i % 4; k++) a += W[k];
    return a;
  endfunction

  // taps passed after e ps
  function automatic int code_after(input int e);
    int n = 0;
    while (n < NTAPS && arrival(n) < e) n++;
    return n;
  endfunction

  typedef struct { int unsigned coarse; int raw; int n; } exp_t;
  exp_t q [$];
  int hist_raw [NTAPS+1];
  int hist_lin [257];
  int hist_dit [257];
  longint unsigned bnd [NTAPS+1];

  function automatic bit lin_match(input int cal, input int raw, input int n);
    for (int m = n - 1; m <= n + 1; m++)
      if (cal == ((raw >= m) ? 256 : (raw * 256) / m)) return 1'b1;
    return 1'b0;
  endfunction

  always @(negedge clk) rd_en <= !empty;
  always @(posedge clk)
    if (rd_en && !rst) begin
      if (q.size() == 0) chk(1'b0, "unexpected word");
      else begin
        automatic exp_t e = q.pop_front();
        automatic int raw = int'(rd_data.raw);
        automatic int cal = int'(rd_data.cal);
        chk(rd_data.coarse == e.coarse[COARSE_W-1:0] && raw == e.raw,
            $sformatf("coarse/raw %0d/%0d exp %0d/%0d", rd_data.coarse, raw,
                      e.coarse[COARSE_W-1:0], e.raw));
        if (!cal_mode) begin
          chk(lin_match(cal, raw, e.n), $sformatf("linear cal %0d for raw %0d, N %0d", cal, raw, e.n));
          hist_raw[raw]++;
          hist_lin[cal]++;
        end else begin
          automatic int lo = int'(bnd[raw-1] >> DITHER_F) + 1;
          automatic int hi = (bnd[raw] > bnd[raw-1]) ? int'((bnd[raw] - 1) >> DITHER_F) + 1 : lo;
          chk(cal >= lo && cal <= hi, $sformatf("dithered cal %0d for raw %0d outside %0d..%0d", cal, raw, lo, hi));
          hist_dit[cal]++;
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
    exp_t e;
    @(posedge clk);
    #1;
    e.coarse = tb_cnt + 1;
    e.raw    = code_after(T - d);
    e.n      = int'(interp_n);
    #(d - 1);
    hit = 1'b1;
    q.push_back(e);
    #400 hit = 1'b0;
  endtask

  task automatic run_hits(input int n);
    for (int h = 0; h < n; h++) begin
      automatic int d;
      automatic bit edge_hit;
      // keep clear of the instants at which a tap changes
      do begin
        d = $urandom_range(1, T - 70);
        edge_hit = 1'b0;
        for (int i = 0; i < 4; i++)
          if ((T - d) % 64 == arrival(i) % 64) edge_hit = 1'b1;
      end while (edge_hit);
      wait_frame_pos(0);
      wait_frame_pos($urandom_range(0, 14));
      hit_after_edge(d);
    end
    repeat (20) @(posedge clk);
    chk(q.size() == 0, "words missing");
  endtask

  initial begin
    #(longint'(T) * 200000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total, cls [4], lin_empty, dit_empty;
    longint unsigned cum;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    wait (ready);
    repeat (20) @(posedge clk);

    // phase 1: code density with linear interpolation
    run_hits(HITS);
    chk(range_mean inside {208, 209}, $sformatf("range %0d", range_mean));
    total = 0;
    for (int k = 0; k < 4; k++) cls[k] = 0;
    for (int c = 1; c <= NTAPS; c++) begin
      total += hist_raw[c];
      cls[c % 4] += hist_raw[c];
    end
    chk(total == HITS, $sformatf("%0d raw codes counted", total));
    for (int k = 0; k < 4; k++) begin
      automatic real share = real'(cls[k]) / real'(total);
      automatic real ideal = real'(W[k]) / 64.0;
      $display("codes c mod 4 = %0d: share %0.3f, tap delay share %0.3f", k, share, ideal);
      chk(share > ideal - 0.04 && share < ideal + 0.04,
          $sformatf("in-slice share %0d: %0.3f exp %0.3f", k, share, ideal));
    end

    // boundary table from the measured density
    cum = 0;
    bnd[0] = 0;
    for (int c = 1; c <= NTAPS; c++) begin
      cum += longint'(hist_raw[c]);
      bnd[c] = (cum * 64'h1_0000 + longint'(total) / 2) / longint'(total);
    end
    for (int c = 0; c <= NTAPS; c++) begin
      @(negedge clk);
      dt_we = 1'b1; dt_addr = CODE_W'(c); dt_data = bnd[c][CAL_B+DITHER_F:0];
    end
    @(negedge clk) dt_we = 1'b0;
    cal_mode = 1'b1;
    repeat (5) @(posedge clk);

    // phase 2: the same kind of hits, dithered
    run_hits(HITS);

    lin_empty = 0; dit_empty = 0;
    for (int s = 1; s <= 255; s++) begin
      if (hist_lin[s] == 0) lin_empty++;
      if (hist_dit[s] == 0) dit_empty++;
    end
    $display("empty output slots of 255: linear %0d, dithered %0d", lin_empty, dit_empty);
    // a single linear table reaches 208 of the 256 slots; N moving between 208
    // and 209 during the run makes two tables reach a few more
    chk(lin_empty >= 10, $sformatf("linear map left only %0d slots empty", lin_empty));
    chk(dit_empty <= 10 && dit_empty < lin_empty, $sformatf("dithering left %0d slots empty", dit_empty));
    chk(!overflow, "FIFO overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
