// duty_lut: memory 2, the pre-computed PID duty table.
//
// The reference design rewrites the PID law so that the whole calculation
// becomes one table look-up:
//   u(k) = uref - (KP+KI) r + A * address',   A = KP + KI + KD,
//   address' = y1(k) + a - b  (from the programmable counter).
// Entry i of this table (address' = i - 2^(A2_W-1)) holds that value,
// rounded and clamped to the U_W-bit duty range 0 .. 2^U_W-1. U_W = 9 is the
// reference design's DPWM resolution. Gains are Q10 integers; the clamp, the
// address offset and the write port are this design's choices.
// Timing: registered read, u is valid one clock after addr. This read is the
// main delay of the control loop.
module duty_lut #(
  parameter int unsigned A2_W  = dpwm_pkg::A2_W_DEF,
  parameter int unsigned U_W   = dpwm_pkg::U_W_DEF,
  parameter int          KP_Q  = dpwm_pkg::KP_Q_DEF,
  parameter int          KI_Q  = dpwm_pkg::KI_Q_DEF,
  parameter int          KD_Q  = dpwm_pkg::KD_Q_DEF,
  parameter int          UREF  = dpwm_pkg::UREF_DEF,
  parameter int          R_REF = dpwm_pkg::R_REF_DEF
) (
  input  logic            clk,
  input  logic [A2_W-1:0] addr,
  output logic [U_W-1:0]  u,
  input  logic            we,
  input  logic [A2_W-1:0] waddr,
  input  logic [U_W-1:0]  wdata
);
  localparam int unsigned DEPTH = 1 << A2_W;
  localparam int          BIAS  = 1 << (A2_W - 1);
  localparam int          UMAX  = (1 << U_W) - 1;

  logic [U_W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      longint num;
      int v;
      num = (longint'(KP_Q) + longint'(KI_Q) + longint'(KD_Q)) * (longint'(i) - longint'(BIAS)) - (longint'(KP_Q) + longint'(KI_Q)) * R_REF;
      v = UREF + dpwm_pkg::div_round(num, longint'(1) << dpwm_pkg::GAIN_FRAC);
      v = (v > UMAX) ? UMAX : (v < 0) ? 0 : v;
      mem[i] = U_W'(v);
    end
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    u <= mem[addr];
  end
endmodule
