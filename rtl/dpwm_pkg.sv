// dpwm_pkg: constants and types shared by the DPWM-POL controller.
//
// The controller senses the converter output voltage with a DAC sweep and an
// analog comparator, turns the moment of the comparator trip into a count
// y1(k), and looks the duty value u(k) up in a pre-computed PID table. The
// numbers below are the controller's defaults: a 500 MHz system clock and a
// 1 MHz switching frequency give 500 counts per switching term, and the duty
// value is 9 bits wide, as in the reference design. Gains are held as Q10
// fixed-point integers (value * 1024) so the tables can be computed at
// elaboration time with integer arithmetic; that encoding is this design's
// own choice.
package dpwm_pkg;

  // Switching term length in system-clock cycles (fCLK / fs = 500 MHz / 1 MHz).
  localparam int unsigned PERIOD_DEF = 500;
  // Width of the up-counter and of the duty value u(k) (9-bit DPWM resolution).
  localparam int unsigned CNT_W_DEF  = 9;
  localparam int unsigned U_W_DEF    = 9;
  // DAC code width (a 10-bit part).
  localparam int unsigned DAC_W_DEF  = 10;
  // Memory-2 address width; address' is stored with an offset of 2^(A2_W-1).
  localparam int unsigned A2_W_DEF   = 10;
  // Width of the integral factor nI (signed) and of the offsets a, b (signed).
  localparam int unsigned NI_W_DEF   = 12;
  localparam int unsigned AB_W_DEF   = 10;

  // Fixed-point scaling of the PID gains.
  localparam int unsigned GAIN_FRAC  = 10;
  localparam int          KP_Q_DEF   = 5120;  // KP = 5.0
  localparam int          KI_Q_DEF   = 82;    // KI = 0.08 (82/1024 = 0.0801)
  localparam int          KD_Q_DEF   = 0;     // KD = 0
  // Steady-state duty count: Vref / Ei * PERIOD = 1.5 V / 6 V * 500.
  localparam int          UREF_DEF   = 125;
  // DAC codes per clock of the step-down sawtooth. With 2 codes (3.3 mV) per
  // clock the sweep covers 1.7 V .. 0.05 V within one term and crosses the
  // 1.5 V reference about 60 counts into the term, well inside the nominal
  // 125-count on-time, so the sensed value can still shorten that on-time.
  localparam int unsigned DAC_STEP_DEF = 2;
  // Digitised reference r, in up-counter counts at the latch: the sweep
  // from Vref+ = 1.7 V in steps of 2 * 1.7 V/1023 reaches Vref = 1.5 V after
  // 60 steps, and the comparator result is seen 3 cycles after the count
  // that addressed the DAC code.
  localparam int          R_REF_DEF  = 63;

  // Rounded integer division (round half away from zero).
  function automatic int div_round(input longint num, input longint den);
    longint q;
    if (den == 0) return 0;
    if ((num < 0) != (den < 0)) q = (num - den / 2) / den;
    else                        q = (num + den / 2) / den;
    return int'(q);
  endfunction

  // Table selector of the shared table-write port.
  typedef enum logic [1:0] {
    TBL_MEM1 = 2'd0,   // sawtooth / DAC waveform
    TBL_MEM2 = 2'd1,   // duty value u(address')
    TBL_MEM3 = 2'd2,   // a = (KI/A) nI
    TBL_MEM4 = 2'd3    // b = (KD/A) y2
  } tbl_sel_e;

endpackage
