// tb_tap_sampler: the output must equal the (downsampled) line state
// captured two clocks earlier (three synchronizer stages), and all ones for a
// capture taken while clr was high. Runs DS = 1 and DS = 4.
module tb_tap_sampler;
  timeunit 1ps; timeprecision 1ps;

  localparam int N = 32;
  logic clk = 1'b0, clr = 1'b0;
  logic [N-1:0] taps = '0;
  logic [N-1:0] q1;
  logic [N/4-1:0] q4;
  int checks = 0, failures = 0;

  tap_sampler #(.NTAPS(N), .DS(1)) dut1 (.clk, .clr, .taps, .q(q1));
  tap_sampler #(.NTAPS(N), .DS(4)) dut4 (.clk, .clr, .taps, .q(q4));

  always #5 clk = ~clk;

  function automatic logic [N/4-1:0] down4(input logic [N-1:0] t);
    for (int i = 0; i < N / 4; i++) down4[i] = t[4*i+3];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] hist [$];
    for (int c = 0; c < 200; c++) begin
      @(negedge clk);
      taps = $urandom();
      clr  = ($urandom_range(0, 9) == 0);
      @(posedge clk);
      hist.push_back(clr ? '1 : taps);
      #1;
      if (hist.size() > 3) void'(hist.pop_front());
      if (hist.size() == 3) begin
        checks += 2;
        if (q1 != hist[0]) begin failures++; $display("FAIL: DS1 %h exp %h", q1, hist[0]); end
        if (q4 != down4(hist[0])) begin failures++; $display("FAIL: DS4 %h", q4); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
