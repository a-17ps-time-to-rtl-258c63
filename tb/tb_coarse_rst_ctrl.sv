// tb_coarse_rst_ctrl: the counter counts clocks from reset; in normal mode
// line_rst/samp_clr are high exactly in cycles whose count ends in 15 (one
// per 16-cycle frame) and never in Turbo mode; tag is the count two clocks
// earlier and arm is low only for tags ending in 0 in normal mode.
module tb_coarse_rst_ctrl;
  timeunit 1ps; timeprecision 1ps;

  logic clk = 1'b0, rst = 1'b1, turbo = 1'b0;
  logic [15:0] cnt, tag;
  logic line_rst, samp_clr, arm;
  int checks = 0, failures = 0, resets = 0;

  coarse_rst_ctrl dut (.clk, .rst, .turbo, .cnt, .line_rst, .samp_clr, .tag, .arm);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned n = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 600; c++) begin
      @(posedge clk); #1;
      n++;
      if (c == 300) turbo = 1'b1;
      chk(cnt == 16'(n), $sformatf("cnt %0d exp %0d", cnt, n));
      if (c > 302) chk(!line_rst, "line_rst in turbo");
      else if (c < 299) begin
        chk(line_rst == ((n % 16) == 15), $sformatf("line_rst %b at %0d", line_rst, n));
        if (line_rst) resets++;
      end
      chk(samp_clr == line_rst, "samp_clr");
      if (n >= 2) chk(tag == 16'(n - 2), $sformatf("tag %0d at %0d", tag, n));
      chk(arm == (turbo || (tag % 16) != 0), "arm");
    end
    chk(resets == 18, $sformatf("resets %0d", resets));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
