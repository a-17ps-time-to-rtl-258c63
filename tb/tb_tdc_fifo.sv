// tb_tdc_fifo: random pushes and pops against a queue model on an 8-word
// FIFO; writes while full must be dropped and set the sticky overflow flag;
// the head word must be visible while empty is low.
module tb_tdc_fifo;
  timeunit 1ps; timeprecision 1ps;

  localparam int W = 12, D = 8;
  logic clk = 1'b0, rst = 1'b1, wr_en = 1'b0, rd_en = 1'b0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic empty, full, overflow;
  logic [3:0] count;
  int checks = 0, failures = 0, overflows = 0;

  tdc_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst, .wr_en, .wr_data, .rd_en, .rd_data,
                                        .empty, .full, .overflow, .count);

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
    logic [W-1:0] q [$];
    bit ovf_model = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 2000; c++) begin
      automatic int phase = (c / 200) % 2;   // alternate fill-heavy and drain-heavy
      @(negedge clk);
      chk(empty == (q.size() == 0) && full == (q.size() == D) && int'(count) == q.size(), "flags");
      if (q.size() > 0) chk(rd_data == q[0], $sformatf("head %h exp %h", rd_data, q[0]));
      chk(overflow == ovf_model, "overflow flag");
      wr_en   = ($urandom_range(0, 3) < (phase ? 1 : 3));
      rd_en   = ($urandom_range(0, 3) < (phase ? 3 : 1));
      wr_data = W'($urandom());
      @(posedge clk);
      begin
        automatic bit do_rd = rd_en && q.size() > 0;
        automatic bit do_wr = wr_en && (q.size() < D || do_rd);
        if (wr_en && !do_wr) begin ovf_model = 1; overflows++; end
        if (do_rd) void'(q.pop_front());
        if (do_wr) q.push_back(wr_data);
      end
    end
    chk(overflows > 0, "overflow exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
