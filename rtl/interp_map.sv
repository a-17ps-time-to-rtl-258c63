// interp_map: linear interpolation of the raw fine code by table look-up.
//
// A raw code c in ]0, N], N being the taps per clock period from the range
// adjustment, is mapped to c' = floor(c * 2^B / N) in ]0, 2^B]. As in the
// design description, the map lives in a RAM and is recomputed whenever N
// changes; with 2^B > N some output codes never occur.
//
// Recomputation: a serial restoring division (B+1 clocks) gives
// q = floor(2^B / N) and r = 2^B mod N; the table is then filled one entry
// per clock by adding q and carrying the remainder, so no multiplier or
// divider per entry is needed (NT+1 clocks). Entries above N hold 2^B. The
// RAM has two banks: the new table is written to the idle bank and the banks
// swap when it is complete, so look-ups never see a half-written table. The
// fill method and the double buffering are this design's choices.
//
// Interface: n_range is N (taken when it differs from the active table's N
// and no refill is running). lk_valid/lk_code look up; out_valid/out_cal
// follow one clock later. ready is high once a first table exists;
// refill_done pulses when a new table becomes active, cur_n is its N.
module interp_map #(
  parameter int unsigned NT = tdc_pkg::NTAPS,
  parameter int unsigned CW = tdc_pkg::CODE_W,
  parameter int unsigned B  = tdc_pkg::CAL_B
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [CW-1:0] n_range,
  input  logic          lk_valid,
  input  logic [CW-1:0] lk_code,
  output logic          out_valid,
  output logic [B:0]    out_cal,
  output logic          ready,
  output logic          refill_done,
  output logic [CW-1:0] cur_n
);
  timeunit 1ps; timeprecision 1ps;

  typedef enum logic [1:0] {IDLE, DIV, FILL} state_e;

  localparam logic [B:0] FULL = (B+1)'(1) << B;

  logic [B:0]     mem [2][NT+1];
  logic           active;
  state_e         state;
  logic [CW-1:0]  n_new;
  logic [CW:0]    rem;       // division remainder, < 2N
  logic [B:0]     quo;
  int unsigned    bit_idx;
  logic [B:0]     q_step;
  logic [CW-1:0]  r_step;
  logic [B:0]     q_acc;
  logic [CW:0]    r_acc;
  logic [CW-1:0]  c;

  // one restoring-division step on dividend 2^B
  logic [CW:0] rem_sh;
  assign rem_sh = {rem[CW-1:0], (bit_idx == B)};

  logic [CW:0] r_sum;
  assign r_sum = r_acc + (CW+1)'(r_step);

  always_ff @(posedge clk) begin
    refill_done <= 1'b0;
    if (rst) begin
      state   <= IDLE;
      active  <= 1'b0;
      ready   <= 1'b0;
      cur_n   <= '0;
      n_new   <= '0;
      rem     <= '0;
      quo     <= '0;
      bit_idx <= 0;
      q_step  <= '0;
      r_step  <= '0;
      q_acc   <= '0;
      r_acc   <= '0;
      c       <= '0;
    end else begin
      case (state)
        IDLE:
          if (n_range != '0 && (n_range != cur_n || !ready)) begin
            n_new   <= n_range;
            rem     <= '0;
            quo     <= '0;
            bit_idx <= B;
            state   <= DIV;
          end
        DIV: begin
          if (rem_sh >= {1'b0, n_new}) begin
            rem          <= rem_sh - {1'b0, n_new};
            quo[bit_idx] <= 1'b1;
          end else begin
            rem <= rem_sh;
          end
          if (bit_idx == 0) begin
            state <= FILL;
            c     <= '0;
            q_acc <= '0;
            r_acc <= '0;
          end else begin
            bit_idx <= bit_idx - 1;
          end
        end
        FILL: begin
          if (c == '0) begin
            // the division finished on the previous clock
            q_step <= quo;
            r_step <= rem[CW-1:0];
            q_acc  <= quo;
            r_acc  <= {1'b0, rem[CW-1:0]};
            if (rem[CW-1:0] >= n_new) begin
              q_acc <= quo + 1'b1;
              r_acc <= {1'b0, rem[CW-1:0]} - {1'b0, n_new};
            end
          end else if (r_sum >= {1'b0, n_new}) begin
            q_acc <= q_acc + q_step + 1'b1;
            r_acc <= r_sum - {1'b0, n_new};
          end else begin
            q_acc <= q_acc + q_step;
            r_acc <= r_sum;
          end
          if (c == CW'(NT)) begin
            active      <= ~active;
            cur_n       <= n_new;
            ready       <= 1'b1;
            refill_done <= 1'b1;
            state       <= IDLE;
          end else begin
            c <= c + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // table write: entry c = floor(c * 2^B / N), clamped above N
  always_ff @(posedge clk)
    if (state == FILL)
      mem[~active][c] <= (c >= n_new) ? FULL : ((c == '0) ? '0 : q_acc);

  always_ff @(posedge clk) begin
    out_valid <= lk_valid && !rst;
    out_cal   <= mem[active][(lk_code > CW'(NT)) ? CW'(NT) : lk_code];
  end
endmodule
