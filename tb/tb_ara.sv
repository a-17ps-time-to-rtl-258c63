// tb_ara: range adjustment. A valid measurement N(x) followed by N(x+1) must
// give range_raw = N(x+1) - N(x) one clock later; it must be ignored when the
// edge left the line (full_sat) or when N(x) was not valid. The running mean
// is compared with an exponential average (weight 1/16) computed here and
// must move from 208 to a new range of 170 taps.
module tb_ara;
  timeunit 1ps; timeprecision 1ps;

  localparam int CW = 9;
  logic clk = 1'b0, rst = 1'b1, first = 1'b0, full_sat = 1'b0;
  logic [CW-1:0] code = '0, full_code = '0;
  logic range_stb;
  logic [CW-1:0] range_raw, range_mean;
  int checks = 0, failures = 0;

  ara dut (.clk, .rst, .first, .code, .full_code, .full_sat, .range_stb, .range_raw, .range_mean);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int acc = 208 * 16;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    chk(range_mean == 208, $sformatf("initial mean %0d", range_mean));
    for (int m = 0; m < 150; m++) begin
      automatic int nx = $urandom_range(1, 200);
      automatic int r  = (m < 10) ? 208 : 170;
      automatic bit sat = (m % 9 == 4);
      automatic bit valid = (m % 11 != 7);
      // cycle x: measurement N(x)
      @(negedge clk);
      first = valid; code = CW'(nx); full_code = '0; full_sat = 1'b0;
      // cycle x+1: N(x+1)
      @(negedge clk);
      first = 1'b0; code = '0;
      full_code = sat ? CW'(416) : CW'(nx + r); full_sat = sat;
      @(negedge clk);
      full_code = '0; full_sat = 1'b0;
      if (valid && !sat) begin
        acc = acc - (acc + 8) / 16 + r;
        chk(range_stb && range_raw == CW'(r), $sformatf("raw %0d exp %0d", range_raw, r));
      end else
        chk(!range_stb, "range taken from an invalid pair");
      chk(int'(range_mean) == (acc + 8) / 16,
          $sformatf("mean %0d exp %0d", range_mean, (acc + 8) / 16));
    end
    chk(range_mean >= 169 && range_mean <= 171, $sformatf("converged mean %0d", range_mean));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
