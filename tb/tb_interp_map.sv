// tb_interp_map: after the table for N is built every code c must map to
// floor(c * 256 / N) (2^8 for c >= N). Tests N = 208, then a change to
// N = 150 and N = 237: look-ups during the refill must still return the old
// table, and the refill must finish 9 division steps plus 417 table writes
// after the change.
module tb_interp_map;
  timeunit 1ps; timeprecision 1ps;

  localparam int NT = 416, CW = 9;
  logic clk = 1'b0, rst = 1'b1, lk_valid = 1'b0;
  logic [CW-1:0] n_range = CW'(208), lk_code = '0, cur_n;
  logic out_valid, ready, refill_done;
  logic [8:0] out_cal;
  int checks = 0, failures = 0;

  interp_map dut (.clk, .rst, .n_range, .lk_valid, .lk_code, .out_valid, .out_cal,
                  .ready, .refill_done, .cur_n);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int expect_cal(input int c, input int n);
    return (c >= n) ? 256 : (c * 256) / n;
  endfunction

  task automatic lookup_all(input int n, input int count);
    for (int i = 0; i < count; i++) begin
      automatic int c = (count > NT) ? i : $urandom_range(0, NT);
      @(negedge clk); lk_valid = 1'b1; lk_code = CW'(c);
      @(negedge clk); lk_valid = 1'b0;
      chk(out_valid && int'(out_cal) == expect_cal(c, n),
          $sformatf("N=%0d c=%0d cal %0d exp %0d", n, c, out_cal, expect_cal(c, n)));
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    int ns [3] = '{208, 150, 237};
    repeat (2) @(negedge clk);
    rst = 1'b0;
    wait (ready);
    chk(cur_n == 208, "first table");
    lookup_all(208, NT + 1);
    for (int k = 1; k < 3; k++) begin
      @(negedge clk);
      n_range = CW'(ns[k]);
      t0 = $time;
      lookup_all(ns[k-1], 40);         // old table still served during refill
      @(posedge refill_done);
      t1 = $time;
      // half a clock to the first edge, 1 clock to start, 9 division steps,
      // 417 table entries, the last of which raises refill_done
      chk((t1 - t0) / 10 == 9 + 417,
          $sformatf("refill took %0d clocks", (t1 - t0) / 10));
      #1;
      chk(cur_n == CW'(ns[k]), "cur_n");
      lookup_all(ns[k], NT + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
