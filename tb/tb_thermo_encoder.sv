// tb_thermo_encoder: feeds line samples built the way the delay line makes
// them (an edge k taps in, older edges further on, optional bubbles) and
// compares code / hit / first / full_code with a reference computed here.
// Covers normal-mode frames (reset to ones, zeros launched), Turbo-mode
// trains of alternating edges in consecutive cycles, bubbles, and the
// bit-counting option.
module tb_thermo_encoder;
  timeunit 1ps; timeprecision 1ps;
  import tdc_pkg::*;

  localparam int NT = 64, CW = 7, W = 26;   // 26 taps per clock period
  logic clk = 1'b0, rst = 1'b1, arm = 1'b1, one = 1'b1;
  logic [NT-1:0] samp = '1;
  logic [CW-1:0] window = CW'(W);
  logic hit_f, first_f, sat_f, hit_c, first_c, sat_c;
  logic [CW-1:0] code_f, full_f, code_c, full_c;
  int checks = 0, failures = 0, bubbles = 0, multi = 0, seconds = 0;

  thermo_encoder #(.NT(NT), .CW(CW), .METHOD(BUBBLE_FIRST_BIT)) dut (
    .clk, .rst, .samp, .arm, .one_per_frame(one), .window, .hit(hit_f), .code(code_f), .first(first_f),
    .full_code(full_f), .full_sat(sat_f));
  thermo_encoder #(.NT(NT), .CW(CW), .METHOD(BUBBLE_COUNT)) dutc (
    .clk, .rst, .samp, .arm, .one_per_frame(one), .window, .hit(hit_c), .code(code_c), .first(first_c),
    .full_code(full_c), .full_sat(sat_c));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // edges launched at fractional positions; pos[j] = taps travelled now
  int pos [$];
  logic level;          // value launched by the latest edge
  logic rest;           // value ahead of the oldest edge

  function automatic logic [NT-1:0] build();
    logic [NT-1:0] s;
    for (int i = 0; i < NT; i++) begin
      automatic logic v = rest;
      // newest edge first: tap i holds the value of the newest edge passing it
      for (int j = pos.size() - 1; j >= 0; j--)
        if (i < pos[j]) begin
          v = ((pos.size() - 1 - j) % 2 == 0) ? level : ~level;
          break;
        end
      s[i] = v;
    end
    return s;
  endfunction

  // drive one sample, return after the encoder registered it
  task automatic step(input logic [NT-1:0] s);
    @(negedge clk);
    samp = s;
    @(posedge clk); #1;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev_nonzero;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    step('1);
    // normal mode: frames with one zero-edge each
    for (int f = 0; f < 30; f++) begin
      automatic int k = $urandom_range(1, W - 1);
      logic [NT-1:0] s;
      automatic int bub = -1;
      pos = {k}; level = 1'b0; rest = 1'b1;
      s = build();
      if (f % 3 == 1 && k > 3) begin bub = $urandom_range(1, k - 2); s[bub] = ~s[bub]; bubbles++; end
      step(s);
      chk(hit_f && code_f == CW'(k), $sformatf("normal code %0d exp %0d", code_f, k));
      chk(first_f, "normal first");
      chk(hit_c && code_c == CW'((bub >= 0) ? k - 1 : k),
          $sformatf("count code %0d exp %0d", code_c, (bub >= 0) ? k - 1 : k));
      // next cycle: the same edge one period further; not a new hit
      pos = {k + W};
      step(build());
      chk(!hit_f && !hit_c, "no second hit");
      chk(full_f == CW'((k + W > NT) ? NT : k + W), $sformatf("full %0d exp %0d", full_f, k + W));
      chk(sat_f == (k + W >= NT), "full_sat");
      // a later change at the head of the line in the same frame (normal
      // mode) must not count as a hit
      if (f % 4 == 2) begin
        step({{(NT-3){1'b0}}, 3'b111});
        chk(!hit_f, "second hit in a frame");
        seconds++;
      end
      // frame reset: all ones, not armed
      arm = 1'b0; step('1); arm = 1'b1;
      step('1);
      chk(!hit_f, "idle");
    end
    // Turbo mode: alternating edges in consecutive cycles
    one = 1'b0;
    pos = {}; level = 1'b1; rest = 1'b1;
    step('1);
    prev_nonzero = 0;
    for (int c = 0; c < 200; c++) begin
      automatic bit launch = ($urandom_range(0, 2) != 0);
      automatic int k = $urandom_range(1, W - 1);
      // advance existing edges by one period, drop those that left
      for (int j = 0; j < pos.size(); j++) pos[j] += W;
      while (pos.size() > 0 && pos[0] >= NT) begin
        void'(pos.pop_front());
        rest = (pos.size() % 2 == 0) ? level : ~level;
      end
      if (launch) begin
        pos.push_back(k);
        level = ~level;
      end
      step(build());
      chk(hit_f == launch, $sformatf("turbo hit %b exp %b (c=%0d)", hit_f, launch, c));
      if (launch) begin
        chk(code_f == CW'(k), $sformatf("turbo code %0d exp %0d", code_f, k));
        chk(first_f == (prev_nonzero == 0), "turbo first");
        if (prev_nonzero) multi++;
      end
      prev_nonzero = launch;
    end
    chk(bubbles > 0 && multi > 0 && seconds > 0, "bubbles and consecutive hits exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
