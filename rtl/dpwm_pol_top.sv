// dpwm_pol_top: digital controller of the DPWM point-of-load converter.
//
// The controller closes a buck converter's voltage loop with almost no
// computation delay. Instead of an A/D converter it sweeps an external DAC
// with a step-down sawtooth (memory 1) and watches an analog comparator
// that compares the output voltage Eo with the DAC voltage: the up-counter
// value at which the comparator trips, y1(k), is the sensed voltage (a
// higher Eo trips earlier). The PID law is pre-computed into memory 2,
// indexed by address' = y1 + a - b, where a = (KI/A) nI (memory 3) and
// b = (KD/A) y2 (memory 4) are prepared during the previous term and loaded
// into a programmable counter that runs in step with the up-counter. Memory
// 2 is therefore read continuously, and when the comparator trips the
// matching duty value u(k) is already on its output and is loaded into
// D-FF4 one clock later. The digital comparator drives PWM high while the
// up-counter is below u(k); since u(k) is preset to its maximum at every
// term start, the sensed Eo shortens the on-time of the same term. If Eo is
// above the top of the sweep (Vref+), the PWM is forced off for the term.
//
// Per-term timeline (counts of the up-counter, defaults PERIOD=500):
//   count PERIOD-1 : PR - u(k) preset to max, programmable counter <= a-b
//   count 0        : DAC sweep restarts at Vref+, PWM on
//   SENSE_LAT..PERIOD-4 : sensing window; a trip seen at count c gives
//                    y1=c, u(k) <= mem2[c+a-b] on the edge after c+1, the
//                    compare uses it from c+2 (PWM output one clock later)
//   after the event: nI, y2 update, memories 3/4 read, a-b ready by PR.
// SENSE_LAT = 1 (memory-1 read) + SYNC_STAGES + EXT_LAT, where EXT_LAT
// is the latency of the external DAC and comparator in clocks.
//
// Structure, the look-up-table PID and the timing of the preset follow the
// reference design; widths other than the 9-bit duty value, the sensing
// window, the handling of a term without a trip, the registered PWM output
// and the table-write port are this design's own.
// Ports: comp_in is the asynchronous comparator output; dac_code goes to the
// DAC; pwm goes to the gate driver; tbl_* write one table entry per clock
// (tbl_sel chooses memory 1..4); the remaining outputs expose the loop
// state for observation.
module dpwm_pol_top #(
  parameter int unsigned PERIOD      = dpwm_pkg::PERIOD_DEF,
  parameter int unsigned CNT_W       = dpwm_pkg::CNT_W_DEF,
  parameter int unsigned U_W         = dpwm_pkg::U_W_DEF,
  parameter int unsigned DAC_W       = dpwm_pkg::DAC_W_DEF,
  parameter int unsigned DAC_STEP    = dpwm_pkg::DAC_STEP_DEF,
  parameter int unsigned A2_W        = dpwm_pkg::A2_W_DEF,
  parameter int unsigned NI_W        = dpwm_pkg::NI_W_DEF,
  parameter int unsigned AB_W        = dpwm_pkg::AB_W_DEF,
  parameter int          KP_Q        = dpwm_pkg::KP_Q_DEF,
  parameter int          KI_Q        = dpwm_pkg::KI_Q_DEF,
  parameter int          KD_Q        = dpwm_pkg::KD_Q_DEF,
  parameter int          UREF        = dpwm_pkg::UREF_DEF,
  parameter int          R_REF       = dpwm_pkg::R_REF_DEF,
  parameter int unsigned SYNC_STAGES = 2,
  parameter int unsigned EXT_LAT     = 0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   comp_in,
  output logic [DAC_W-1:0]       dac_code,
  output logic                   pwm,
  input  logic                   tbl_we,
  input  dpwm_pkg::tbl_sel_e     tbl_sel,
  input  logic [11:0]            tbl_addr,
  input  logic [15:0]            tbl_data,
  output logic [U_W-1:0]         u_k,
  output logic [CNT_W-1:0]       y1_k,
  output logic                   sense_evt,
  output logic                   crossed,
  output logic                   ovp,
  output logic signed [NI_W-1:0] n_i
);
  import dpwm_pkg::*;

  localparam int unsigned SENSE_LAT = 1 + SYNC_STAGES + EXT_LAT;

  logic [CNT_W-1:0]       cnt;
  logic                   pr, in_win, win_first, win_end;
  logic [CNT_W-1:0]       y2;
  logic                   upd;
  logic signed [AB_W-1:0] a, b;
  logic [A2_W-1:0]        addr2;
  logic [U_W-1:0]         u_mem;

  up_counter #(.PERIOD(PERIOD), .CNT_W(CNT_W)) u_cnt (
    .clk, .rst_n, .cnt);

  pr_generator #(.PERIOD(PERIOD), .CNT_W(CNT_W), .SENSE_LAT(SENSE_LAT)) u_pr (
    .cnt, .pr, .in_win, .win_first, .win_end);

  sawtooth_lut #(.CNT_W(CNT_W), .DAC_W(DAC_W), .DAC_STEP(DAC_STEP)) u_mem1 (
    .clk, .addr(cnt), .code(dac_code),
    .we(tbl_we && tbl_sel == TBL_MEM1), .waddr(tbl_addr[CNT_W-1:0]),
    .wdata(tbl_data[DAC_W-1:0]));

  latch_gen #(.CNT_W(CNT_W), .SYNC_STAGES(SYNC_STAGES)) u_latch (
    .clk, .rst_n, .comp_in, .cnt, .pr, .in_win, .win_first, .win_end,
    .evt(sense_evt), .y1(y1_k), .crossed, .ovp);

  pid_state #(.CNT_W(CNT_W), .NI_W(NI_W), .R_REF(R_REF)) u_pid (
    .clk, .rst_n, .evt(sense_evt), .y1(y1_k), .n_i, .y2, .upd);

  integral_lut #(.NI_W(NI_W), .AB_W(AB_W), .KP_Q(KP_Q), .KI_Q(KI_Q), .KD_Q(KD_Q)) u_mem3 (
    .clk, .n_i, .a,
    .we(tbl_we && tbl_sel == TBL_MEM3), .waddr(tbl_addr[NI_W-1:0]),
    .wdata(tbl_data[AB_W-1:0]));

  deriv_lut #(.CNT_W(CNT_W), .AB_W(AB_W), .KP_Q(KP_Q), .KI_Q(KI_Q), .KD_Q(KD_Q)) u_mem4 (
    .clk, .y2, .b,
    .we(tbl_we && tbl_sel == TBL_MEM4), .waddr(tbl_addr[CNT_W-1:0]),
    .wdata(tbl_data[AB_W-1:0]));

  prog_counter #(.A2_W(A2_W), .AB_W(AB_W)) u_prog (
    .clk, .rst_n, .load(pr), .a, .b, .addr(addr2));

  duty_lut #(.A2_W(A2_W), .U_W(U_W), .KP_Q(KP_Q), .KI_Q(KI_Q), .KD_Q(KD_Q),
             .UREF(UREF), .R_REF(R_REF)) u_mem2 (
    .clk, .addr(addr2), .u(u_mem),
    .we(tbl_we && tbl_sel == TBL_MEM2), .waddr(tbl_addr[A2_W-1:0]),
    .wdata(tbl_data[U_W-1:0]));

  duty_register #(.U_W(U_W)) u_dff4 (
    .clk, .rst_n, .pr, .evt(sense_evt), .crossed, .ovp, .u_mem, .u(u_k));

  dpwm_comparator #(.CNT_W(CNT_W), .U_W(U_W)) u_cmp (
    .clk, .rst_n, .cnt, .u(u_k), .pwm);

  initial assert (A2_W <= 12 && NI_W <= 12 && CNT_W <= 12 && DAC_W <= 16 && U_W <= 16)
    else $error("table write port is 12 address / 16 data bits wide");

  // The table offsets a, b must be settled before they are loaded at PR.
  always_ff @(posedge clk)
    if (rst_n && pr) assert (!upd && !sense_evt) else $error("a-b not settled at PR");
endmodule
