// duty_register: D-FF4, the register that holds u(k).
//
// At the end of every switching term the PR strobe presets u(k) to its
// maximum, so the PWM output turns on at the start of the next term and
// stays on until Eo has been sensed. On the latch event the duty value
// that memory 2 read for the sensed count is loaded; because this happens
// within the same term, the sensed voltage already shapes the on-time of
// that term. If the event reports over-voltage (Eo above Vref+) u(k) is
// cleared, forcing the PWM off for the rest of the term, as in the
// reference design. If the window closed with no comparator trip, the
// preset maximum is kept.
// Timing: evt and its flags are registered one clock after the trip sample,
// u_mem is the memory-2 output of the same cycle; u changes on that edge.
module duty_register #(
  parameter int unsigned U_W = dpwm_pkg::U_W_DEF
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           pr,
  input  logic           evt,
  input  logic           crossed,
  input  logic           ovp,
  input  logic [U_W-1:0] u_mem,
  output logic [U_W-1:0] u
);
  always_ff @(posedge clk) begin
    if (!rst_n)              u <= '1;
    else if (pr)             u <= '1;
    else if (evt && ovp)     u <= '0;
    else if (evt && crossed) u <= u_mem;
  end
endmodule
