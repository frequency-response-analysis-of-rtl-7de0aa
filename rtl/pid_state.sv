// pid_state: error integrator and y2 register of the look-up-table PID law.
//
// On each latch event (evt) the sensed count y1(k) gives the error
// e(k) = y1(k) - r, the integral factor is updated as nI(k) = nI(k-1) + e(k),
// and y1(k) is kept as y2 for the derivative term, following the reference
// design's equations. nI is a signed NI_W-bit value that saturates instead
// of wrapping (width and saturation are this design's choices), which also
// keeps it inside the address range of memory 3.
// Timing: n_i and y2 change on the clock edge after evt; upd is a one-cycle
// pulse in the following cycle, when the new values are valid.
module pid_state #(
  parameter int unsigned CNT_W = dpwm_pkg::CNT_W_DEF,
  parameter int unsigned NI_W  = dpwm_pkg::NI_W_DEF,
  parameter int          R_REF = dpwm_pkg::R_REF_DEF
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   evt,
  input  logic [CNT_W-1:0]       y1,
  output logic signed [NI_W-1:0] n_i,
  output logic [CNT_W-1:0]       y2,
  output logic                   upd
);
  localparam int NI_MAX = (1 <<< (NI_W - 1)) - 1;
  localparam int NI_MIN = -(1 <<< (NI_W - 1));

  int e_k, sum;

  always_comb begin
    e_k = int'(y1) - R_REF;
    sum = int'(n_i) + e_k;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_i <= '0;
      y2  <= '0;
      upd <= 1'b0;
    end else begin
      upd <= evt;
      if (evt) begin
        y2 <= y1;
        if (sum > NI_MAX)      n_i <= NI_W'(NI_MAX);
        else if (sum < NI_MIN) n_i <= NI_W'(NI_MIN);
        else                   n_i <= NI_W'(sum);
      end
    end
  end
endmodule
