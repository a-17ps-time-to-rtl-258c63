// tb_carry_delay_line: checks the behavioural carry-chain model. After an
// edge on din at time t0, taps 0..k-1 must carry the new value and tap k the
// old one at t0 + 16k + 8 ps, for falling and rising edges, and the line must
// power up at all ones. A second line with UNEVEN = 1 must follow the in-slice
// delays 20/9/21/14 ps: tap k is reached at 64*(k/4) plus the sum of the
// first (k mod 4) + 1 of them; it is checked 4 ps before that instant.
module tb_carry_delay_line;
  timeunit 1ps; timeprecision 1ps;

  localparam int N = 64, TAU = 16;
  logic din = 1'b1;
  logic [N-1:0] taps, utaps;
  localparam int W [4] = '{20, 9, 21, 14};
  int checks = 0, failures = 0;

  carry_delay_line #(.NTAPS(N), .TAP_PS(TAU)) dut (.din, .taps);
  carry_delay_line #(.NTAPS(N), .TAP_PS(TAU), .UNEVEN(1'b1)) dut_u (.din, .taps(utaps));

  function automatic int arrival(input int i);
    int a = 64 * (i / 4);
    for (int k = 0; k <= i % 4; k++) a += W[k];
    return a;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    checks++; if (taps != '1) begin failures++; $display("FAIL: power-up %h", taps); end
    for (int e = 0; e < 6; e++) begin
      automatic int k = $urandom_range(0, N - 1);
      automatic logic v = (e % 2 == 0) ? 1'b0 : 1'b1;
      din = v;
      #(TAU * k + TAU / 2);
      for (int i = 0; i < N; i++) begin
        checks++;
        if (taps[i] != ((i < k) ? v : ~v)) begin
          failures++;
          $display("FAIL: edge %0d k=%0d tap %0d = %b", e, k, i, taps[i]);
        end
      end
      #(TAU * N + 100);
      checks++;
      if (taps != {N{v}}) begin failures++; $display("FAIL: settle %h", taps); end
    end
    for (int e = 0; e < 8; e++) begin
      automatic int k = (e < 4) ? e : $urandom_range(4, N - 1);
      automatic logic v = ~din;
      din = v;
      #(arrival(k) - 4);
      for (int i = 0; i < N; i++) begin
        checks++;
        if (utaps[i] != ((i < k) ? v : ~v)) begin
          failures++;
          $display("FAIL: uneven edge %0d k=%0d tap %0d = %b", e, k, i, utaps[i]);
        end
      end
      #(TAU * N + 100);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
