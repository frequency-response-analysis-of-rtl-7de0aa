// tb_freq_response: open-loop transfer function of the closed voltage loop,
// measured by injection, at the controller's default parameters.
//
// A small sinusoid vinj is added to the voltage the comparator senses
// (sensed = Eo + vinj), the way a loop-gain measurement injects a signal
// through a resistor in the feedback path. With X = sensed and Y = Eo, the
// loop gain is T(f) = -Y(f)/X(f). Both are averaged over each switching term
// and their Fourier coefficients at the injection frequency are accumulated
// over a whole number of injection periods after a settling time.
// Operating points: KP = 5, KI = 0 at 0.01 A, 0.5 A and 1 A, then KP = 5,
// KI = 0.08 at 0.5 A; the tables are rewritten through the table-write port
// between the KI = 0 and KI = 0.08 points.
//
// Printed: |T| in dB and its phase for each frequency, the gain-crossover
// frequency with the phase margin, and the gain margin if the phase passes
// -180 degrees below 250 kHz. The injection is 30 mV below 10 kHz and
// 12 mV above. Checked: every operating point has a gain
// crossover with at least 30 degrees of phase margin and at least 6 dB of
// gain margin (the loop is stable with margin), and the integral gain raises
// the low-frequency loop gain. The plant is the behavioural buck model, so
// the margins are those of this model, not of a particular board.
`timescale 1ns/1ps
module tb_freq_response;
  localparam int PERIOD = 500;
  localparam int NF = 10;
  localparam int KDIV [NF] = '{1000, 500, 200, 100, 50, 25, 20, 10, 5, 4};  // f = 1 MHz / KDIV
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic comp_in, pwm;
  logic [9:0] dac_code;
  logic tbl_we = 0;
  dpwm_pkg::tbl_sel_e tbl_sel = dpwm_pkg::TBL_MEM2;
  logic [11:0] tbl_addr = 0;
  logic [15:0] tbl_data = 0;
  logic [8:0] u_k, y1_k;
  logic sense_evt, crossed, ovp;
  logic signed [11:0] n_i;
  real eo, i_l, vdac, sensed, vinj = 0.0;
  real i_load = 0.01;

  int checks = 0, failures = 0;

  dpwm_pol_top dut (
    .clk, .rst_n, .comp_in, .dac_code, .pwm,
    .tbl_we, .tbl_sel, .tbl_addr, .tbl_data,
    .u_k, .y1_k, .sense_evt, .crossed, .ovp, .n_i);

  always_comb sensed = eo + vinj;
  atc_model #(.DAC_W(10), .VFS(1.7)) atc (.code(dac_code), .eo(sensed), .comp(comp_in), .vdac);
  buck_model plant (.clk, .pwm, .i_load, .eo, .i_l);

  always #1 clk = ~clk;

  initial begin
    #150000000;   // 150 ms
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Injection: phase advances once per clock; frequency = 1 MHz / kdiv.
  int  kdiv = 500;
  longint tick = 0;
  bit  inj_on = 0;
  real vamp = 0.012;   // 30 mV below 10 kHz, where the loop gain is high
  always @(negedge clk) begin
    tick++;
    vinj = inj_on ? vamp * $sin(2.0 * PI * real'(tick) / real'(kdiv * PERIOD)) : 0.0;
  end

  // Term averages of X and Y.
  real xs = 0.0, ys = 0.0;
  int  ns = 0;
  task automatic term_avg(output real x, output real y, output real ph);
    xs = 0.0; ys = 0.0;
    ph = 2.0 * PI * real'(tick) / real'(kdiv * PERIOD);
    repeat (PERIOD) begin
      @(posedge clk);
      xs += sensed; ys += eo;
    end
    x = xs / PERIOD; y = ys / PERIOD;
  endtask

  function automatic int rnd(real r);
    return (r >= 0.0) ? int'($floor(r + 0.5)) : -int'($floor(-r + 0.5));
  endfunction

  task automatic load_tables(real kp, real ki);
    for (int k = 0; k < 1024; k++) begin
      int v;
      v = rnd(125.0 - (kp + ki) * 63.0 + (kp + ki) * real'(k - 512));
      v = (v < 0) ? 0 : (v > 511) ? 511 : v;
      tbl_we <= 1; tbl_sel <= dpwm_pkg::TBL_MEM2; tbl_addr <= 12'(k); tbl_data <= 16'(v);
      @(posedge clk);
    end
    for (int k = 0; k < 4096; k++) begin
      int v;
      v = rnd(ki * real'((k >= 2048) ? k - 4096 : k) / (kp + ki));
      tbl_we <= 1; tbl_sel <= dpwm_pkg::TBL_MEM3; tbl_addr <= 12'(k); tbl_data <= 16'(v & 16'h3FF);
      @(posedge clk);
    end
    tbl_we <= 0;
  endtask

  real gain_db [NF], phase_deg [NF];

  task automatic measure_point(string what, output real pm, output real gm, output real g_low);
    real fc;
    bit have_fc, have_gm;
    for (int j = 0; j < NF; j++) begin
      real xr, xi, yr, yi, x, y, ph, tr, ti, den;
      int nsettle, nmeas;
      kdiv = KDIV[j];
      vamp = (kdiv > 100) ? 0.030 : 0.012;
      tick = 0;
      inj_on = 1;
      nsettle = (kdiv * 3 > 150) ? kdiv * 3 : 150;
      nmeas   = kdiv * ((kdiv >= 100) ? 4 : 400 / kdiv);
      repeat (nsettle * PERIOD) @(posedge clk);
      xr = 0; xi = 0; yr = 0; yi = 0;
      repeat (nmeas) begin
        term_avg(x, y, ph);
        // phase of the middle of the averaging term
        ph += PI / real'(kdiv);
        xr += x * $cos(ph); xi += x * $sin(ph);
        yr += y * $cos(ph); yi += y * $sin(ph);
      end
      // X = xr - j*xi, Y = yr - j*yi; T = -Y/X
      den = xr * xr + xi * xi;
      tr = -(yr * xr + yi * xi) / den;
      ti = (yi * xr - yr * xi) / den;
      gain_db[j]   = 20.0 * $log10($sqrt(tr * tr + ti * ti));
      phase_deg[j] = $atan2(ti, tr) * 180.0 / PI;
      $display("%s  f=%7.1f kHz  |T|=%6.2f dB  phase=%7.1f deg", what, 1000.0 / real'(kdiv),
               gain_db[j], phase_deg[j]);
    end
    inj_on = 0;
    // phase is reported in (-180, 180]; unwrap downwards from the lowest frequency
    for (int j = 1; j < NF; j++)
      while (phase_deg[j] > phase_deg[j - 1] + 180.0) phase_deg[j] -= 360.0;
    have_fc = 0; have_gm = 0; pm = 0.0; gm = 99.0; fc = 0.0;
    for (int j = 1; j < NF; j++) begin
      if (!have_fc && gain_db[j - 1] >= 0.0 && gain_db[j] < 0.0) begin
        real t, p;
        t = gain_db[j - 1] / (gain_db[j - 1] - gain_db[j]);
        fc = 1000.0 / real'(KDIV[j - 1]) + t * (1000.0 / real'(KDIV[j]) - 1000.0 / real'(KDIV[j - 1]));
        p = phase_deg[j - 1] + t * (phase_deg[j] - phase_deg[j - 1]);
        pm = 180.0 + p;
        have_fc = 1;
      end
      if (!have_gm && phase_deg[j - 1] > -180.0 && phase_deg[j] <= -180.0) begin
        real t;
        t = (phase_deg[j - 1] + 180.0) / (phase_deg[j - 1] - phase_deg[j]);
        gm = -(gain_db[j - 1] + t * (gain_db[j] - gain_db[j - 1]));
        have_gm = 1;
      end
    end
    g_low = gain_db[0];
    $display("%s: crossover %0.1f kHz, phase margin %0.1f deg, gain margin %s%0.1f dB, |T| at 1 kHz %0.1f dB",
             what, fc, pm, have_gm ? "" : "> ", have_gm ? gm : -gain_db[NF - 1], g_low);
    if (!have_gm) gm = -gain_db[NF - 1];
    checks++;
    if (!have_fc || pm < 30.0) begin failures++; $display("  no crossover or phase margin below 30 deg"); end
    checks++;
    if (gm < 6.0) begin failures++; $display("  gain margin below 6 dB"); end
  endtask

  initial begin
    real pm, gm, g0, g1;
    repeat (5) @(posedge clk);
    rst_n <= 1;
    load_tables(5.0, 0.0);
    repeat (300 * PERIOD) @(posedge clk);
    i_load = 0.01;
    measure_point("KP=5 KI=0    Io=0.01A", pm, gm, g0);
    i_load = 0.5;
    repeat (100 * PERIOD) @(posedge clk);
    measure_point("KP=5 KI=0    Io=0.5A ", pm, gm, g0);
    g1 = g0;
    i_load = 1.0;
    repeat (100 * PERIOD) @(posedge clk);
    measure_point("KP=5 KI=0    Io=1A   ", pm, gm, g0);
    g0 = g1;
    i_load = 0.5;
    load_tables(5.0, 82.0 / 1024.0);
    repeat (200 * PERIOD) @(posedge clk);
    measure_point("KP=5 KI=0.08 Io=0.5A ", pm, gm, g1);
    checks++;
    if (g1 < g0 + 1.0) begin
      failures++;
      $display("integral gain did not raise the 1 kHz loop gain (%0.1f vs %0.1f dB)", g1, g0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
