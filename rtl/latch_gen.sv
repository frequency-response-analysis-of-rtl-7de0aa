// latch_gen: comparator synchroniser and latch-signal D-FFs.
//
// The analog comparator output (1 when Eo is above the DAC voltage) arrives
// asynchronously; it passes SYNC_STAGES flip-flops. Inside the sensing
// window the first sample that shows a trip is the moment Eo was sensed: the
// count at that clock is captured as y1(k) and a one-cycle event is issued
// (evt, registered, one clock after the trip sample). A trip already on the
// first window sample means Eo is above the highest DAC level Vref+, which
// the reference design answers by forcing the PWM off; that is flagged as
// ovp. If the window closes without a trip (Eo below the lowest level of the
// sweep) the event is still issued at win_end with crossed = 0 and y1 =
// win_end count, so the integral keeps running. One decision per term; pr
// re-arms it. Synchroniser depth and the no-trip rule are this design's own.
module latch_gen #(
  parameter int unsigned CNT_W       = dpwm_pkg::CNT_W_DEF,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             comp_in,
  input  logic [CNT_W-1:0] cnt,
  input  logic             pr,
  input  logic             in_win,
  input  logic             win_first,
  input  logic             win_end,
  output logic             evt,
  output logic [CNT_W-1:0] y1,
  output logic             crossed,
  output logic             ovp
);
  logic [SYNC_STAGES-1:0] sync_q;
  logic                   comp_s;
  logic                   done;
  logic                   hit, timeout;

  always_ff @(posedge clk) begin
    if (!rst_n) sync_q <= '0;
    else        sync_q <= {sync_q[SYNC_STAGES-2:0], comp_in};
  end
  assign comp_s = sync_q[SYNC_STAGES-1];

  always_comb begin
    hit     = in_win && comp_s && !done;
    timeout = win_end && !done && !hit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done    <= 1'b0;
      evt     <= 1'b0;
      y1      <= '0;
      crossed <= 1'b0;
      ovp     <= 1'b0;
    end else begin
      evt <= hit || timeout;
      if (hit || timeout) begin
        y1      <= cnt;
        crossed <= hit;
        ovp     <= hit && win_first;
      end
      if (pr)                  done <= 1'b0;
      else if (hit || timeout) done <= 1'b1;
    end
  end

  initial assert (SYNC_STAGES >= 2) else $error("SYNC_STAGES must be >= 2");
  // At most one decision per switching term.
  logic evt_q;
  always_ff @(posedge clk) begin
    evt_q <= evt;
    if (rst_n && evt) assert (!evt_q) else $error("two latch events in a row");
  end
endmodule
