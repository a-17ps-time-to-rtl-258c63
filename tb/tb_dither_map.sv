// tb_dither_map: loads a boundary table with uneven bins, among them the
// example of a bin 2.5 output slots wide covering the last slot by 40 %, the
// one before by 40 % and the third by 20 %. Each look-up must land in a slot
// its bin overlaps, and over many look-ups the slots' shares must match the
// overlap within a few percent.
module tb_dither_map;
  timeunit 1ps; timeprecision 1ps;

  localparam int NT = 416, CW = 9, B = 8, F = 8, N = 100;
  logic clk = 1'b0, rst = 1'b1, wr_en = 1'b0, lk_valid = 1'b0;
  logic [CW-1:0] wr_addr = '0, lk_code = '0;
  logic [B+F:0] wr_data = '0;
  logic out_valid;
  logic [B:0] out_cal;
  int checks = 0, failures = 0;
  int unsigned bnd [NT+1];
  int hist [4];

  dither_map dut (.clk, .rst, .wr_en, .wr_addr, .wr_data, .lk_valid, .lk_code, .out_valid, .out_cal);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // N = 100 bins: 99 bins share 253.5 slots unevenly, bin 100 is 2.5 slots
    int unsigned total = 0;
    int unsigned w [N+1];
    for (int c = 1; c < N; c++) begin w[c] = $urandom_range(1, 9); total += w[c]; end
    bnd[0] = 0;
    for (int c = 1; c < N; c++) begin
      automatic int unsigned cum = 0;
      for (int i = 1; i <= c; i++) cum += w[i];
      bnd[c] = (cum * (253 * 256 + 128)) / total;
    end
    for (int c = N; c <= NT; c++) bnd[c] = 256 * 256;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c <= NT; c++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = CW'(c); wr_data = (B+F+1)'(bnd[c]);
    end
    @(negedge clk) wr_en = 1'b0;
    for (int k = 0; k < 4000; k++) begin
      automatic int c = (k % 2 == 0) ? N : $urandom_range(1, N);
      automatic int lo = int'(bnd[c-1] >> F) + 1;
      automatic int hi = int'((bnd[c] - 1) >> F) + 1;
      @(negedge clk); lk_valid = 1'b1; lk_code = CW'(c);
      @(negedge clk); lk_valid = 1'b0;
      chk(out_valid && int'(out_cal) >= lo && int'(out_cal) <= hi,
          $sformatf("code %0d -> %0d, allowed %0d..%0d", c, out_cal, lo, hi));
      if (c == N) hist[int'(out_cal) - 253]++;
    end
    // 2000 look-ups of the last bin: 20 % / 40 % / 40 % over slots 254..256
    $display("last bin: %0d %0d %0d", hist[1], hist[2], hist[3]);
    chk(hist[0] == 0, "slot 253 never hit");
    chk(hist[1] > 300 && hist[1] < 500, $sformatf("20%% slot got %0d", hist[1]));
    chk(hist[2] > 700 && hist[2] < 900, $sformatf("40%% slot got %0d", hist[2]));
    chk(hist[3] > 700 && hist[3] < 900, $sformatf("40%% slot got %0d", hist[3]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
