// deriv_lut: memory 4, b = (KD/A) * y2.
//
// The derivative term of the reference design's PID law is folded into the
// memory-2 address as -b, with b = KD/A * y2(k-1) and A = KP + KI + KD. The
// table holds one entry per value of y2 (an up-counter value); entry y is
// round(KD * y / A), clamped to the signed AB_W-bit range. With the default
// KD = 0 every entry is 0. Gains are Q10 integers; the write port is this
// design's choice for loading other gains.
// Timing: registered read, b is valid one clock after y2.
module deriv_lut #(
  parameter int unsigned CNT_W = dpwm_pkg::CNT_W_DEF,
  parameter int unsigned AB_W  = dpwm_pkg::AB_W_DEF,
  parameter int          KP_Q  = dpwm_pkg::KP_Q_DEF,
  parameter int          KI_Q  = dpwm_pkg::KI_Q_DEF,
  parameter int          KD_Q  = dpwm_pkg::KD_Q_DEF
) (
  input  logic                   clk,
  input  logic [CNT_W-1:0]       y2,
  output logic signed [AB_W-1:0] b,
  input  logic                   we,
  input  logic [CNT_W-1:0]       waddr,
  input  logic [AB_W-1:0]        wdata
);
  localparam int unsigned DEPTH = 1 << CNT_W;
  localparam int          HI    = (1 <<< (AB_W - 1)) - 1;
  localparam int          LO    = -(1 <<< (AB_W - 1));

  logic [AB_W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      int v;
      v = dpwm_pkg::div_round(longint'(KD_Q) * i, (longint'(KP_Q) + longint'(KI_Q) + longint'(KD_Q)));
      v = (v > HI) ? HI : (v < LO) ? LO : v;
      mem[i] = AB_W'(v);
    end
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    b <= $signed(mem[y2]);
  end
endmodule
