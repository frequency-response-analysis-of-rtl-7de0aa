// integral_lut: memory 3, a = (KI/A) * nI.
//
// The reference design folds the integral term into the memory-2 address:
// a = KI/A * nI(k-1), with A = KP + KI + KD, is read from this table and
// becomes part of the programmable counter's start value. The table holds
// one entry per value of the signed NI_W-bit integral factor; entry n is
// round(KI * n / A), clamped to the signed AB_W-bit range. Gains are Q10
// integers. The default contents are computed at elaboration; the write
// port (this design's choice) lets new gains be loaded at run time.
// Timing: registered read, a is valid one clock after n_i.
module integral_lut #(
  parameter int unsigned NI_W = dpwm_pkg::NI_W_DEF,
  parameter int unsigned AB_W = dpwm_pkg::AB_W_DEF,
  parameter int          KP_Q = dpwm_pkg::KP_Q_DEF,
  parameter int          KI_Q = dpwm_pkg::KI_Q_DEF,
  parameter int          KD_Q = dpwm_pkg::KD_Q_DEF
) (
  input  logic                   clk,
  input  logic signed [NI_W-1:0] n_i,
  output logic signed [AB_W-1:0] a,
  input  logic                   we,
  input  logic [NI_W-1:0]        waddr,
  input  logic [AB_W-1:0]        wdata
);
  localparam int unsigned DEPTH = 1 << NI_W;
  localparam int          HI    = (1 <<< (AB_W - 1)) - 1;
  localparam int          LO    = -(1 <<< (AB_W - 1));

  logic [AB_W-1:0] mem [DEPTH];

  // Entries are indexed by the two's-complement bit pattern of nI.
  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      int n, v;
      n = (i >= DEPTH / 2) ? i - int'(DEPTH) : i;
      v = dpwm_pkg::div_round(longint'(KI_Q) * n, (longint'(KP_Q) + longint'(KI_Q) + longint'(KD_Q)));
      v = (v > HI) ? HI : (v < LO) ? LO : v;
      mem[i] = AB_W'(v);
    end
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    a <= $signed(mem[unsigned'(n_i)]);
  end
endmodule
