// up_counter: switching-term counter of the DPWM controller.
//
// Counts the system clock from 0 to PERIOD-1 and wraps, so one pass is one
// switching term k. The count is the time base of everything else: it
// addresses the DAC waveform table, it is the value y1(k) captured when the
// comparator trips, and the digital comparator compares it with u(k) to form
// the PWM pulse. PERIOD = fCLK / fs = 500 follows the reference design.
// Interface: cnt is the registered count, which returns to 0 after
// PERIOD-1. Synchronous active-low reset
// to 0 is this design's choice.
module up_counter #(
  parameter int unsigned PERIOD = dpwm_pkg::PERIOD_DEF,
  parameter int unsigned CNT_W  = dpwm_pkg::CNT_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [CNT_W-1:0] cnt
);
  localparam logic [CNT_W-1:0] LAST = CNT_W'(PERIOD - 1);

  logic wrap;

  assign wrap = (cnt == LAST);

  always_ff @(posedge clk) begin
    if (!rst_n)    cnt <= '0;
    else if (wrap) cnt <= '0;
    else           cnt <= cnt + 1'b1;
  end

  initial assert (PERIOD <= (1 << CNT_W) && PERIOD >= 8)
    else $error("PERIOD must fit in CNT_W bits and be at least 8");
endmodule
