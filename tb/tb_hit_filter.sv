// tb_hit_filter: normal mode - line_rst sets the flip-flop to 1, the first
// hit loads 0 and later hits keep it at 0; Turbo mode - every hit toggles it.
module tb_hit_filter;
  timeunit 1ps; timeprecision 1ps;

  logic hit = 1'b0, turbo = 1'b0, line_rst = 1'b0, q;
  int checks = 0, failures = 0;

  hit_filter dut (.hit, .turbo, .line_rst, .q);

  task automatic expect_q(input logic v, input string msg);
    checks++;
    if (q !== v) begin failures++; $display("FAIL: %s q=%b", msg, q); end
  endtask

  task automatic pulse_hit();
    #50 hit = 1'b1; #50 hit = 1'b0; #10;
  endtask

  task automatic pulse_rst();
    #50 line_rst = 1'b1; #50 line_rst = 1'b0; #10;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic model;
    for (int f = 0; f < 5; f++) begin
      pulse_rst();
      expect_q(1'b1, "after reset");
      repeat ($urandom_range(1, 3)) begin
        pulse_hit();
        expect_q(1'b0, "normal hit");
      end
    end
    // reset wins over a hit
    line_rst = 1'b1; pulse_hit(); expect_q(1'b1, "hit during reset"); line_rst = 1'b0;
    turbo = 1'b1;
    pulse_rst();
    model = 1'b1;
    for (int k = 0; k < 20; k++) begin
      pulse_hit();
      model = ~model;
      expect_q(model, "turbo toggle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
