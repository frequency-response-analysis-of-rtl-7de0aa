// dpwm_comparator: digital comparator that forms the DPWM pulse.
//
// The PWM output is on while the up-counter is below u(k), so the on-time of
// term k is u(k) system-clock cycles, with a change of u(k) taking effect at
// once even in the middle of the term. u(k) >= PERIOD gives a fully-on term
// and 0 a fully-off one. The output is registered to be glitch-free, so it
// lags the count by one clock; the polarity and the register are this
// design's choices.
module dpwm_comparator #(
  parameter int unsigned CNT_W = dpwm_pkg::CNT_W_DEF,
  parameter int unsigned U_W   = dpwm_pkg::U_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] cnt,
  input  logic [U_W-1:0]   u,
  output logic             pwm
);
  always_ff @(posedge clk) begin
    if (!rst_n) pwm <= 1'b0;
    else        pwm <= (int'(cnt) < int'(u));
  end
endmodule
