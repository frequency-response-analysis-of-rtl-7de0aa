// tb_dpwm_pol_top: closed-loop simulation of the DPWM-POL controller at its
// default parameters (500 MHz clock, 1 MHz switching, KP = 5, KI = 0.08)
// with behavioural models of the DAC/comparator and of the buck power stage
// (6 V in, 10 uH, 105 uF, 1.5 V reference).
//
// Scenario: soft start from 0 V at 0.01 A; a light-to-heavy load step to
// 2.3 A and back at 50 A/us; then the gain tables (memories 2 and 3) are
// rewritten for proportional-only control (KP = 5, KI = 0) through the
// table-write port and the load steps are repeated.
//
// Checks:
//  * every switching term, a reference model computes from the recorded
//    comparator input the sensed count y1, the integral nI, the offsets a/b,
//    the memory-2 entry and hence the exact PWM on-time of that term, and
//    compares it with the measured on-time (terms during a table rewrite
//    are skipped);
//  * the model's y1 and nI match the controller's outputs;
//  * the average output voltage is within 40 mV of 1.5 V at the end of each
//    settled interval;
//  * each mechanism happened at least once: comparator trip in the window,
//    term with no trip (fully on), over-voltage forced off, on-time cut in the
//    same term in which Eo was sensed, and run-time table reload.
`timescale 1ns/1ps
module tb_dpwm_pol_top;
  localparam int PERIOD = 500;
  localparam int WIN_LO = 3, WIN_HI = PERIOD - 4;
  localparam int R_REF = 63, UREF = 125;

  logic clk = 0, rst_n = 0;
  logic comp_in, pwm;
  logic [9:0] dac_code;
  logic tbl_we = 0;
  dpwm_pkg::tbl_sel_e tbl_sel = dpwm_pkg::TBL_MEM1;
  logic [11:0] tbl_addr = 0;
  logic [15:0] tbl_data = 0;
  logic [8:0] u_k, y1_k;
  logic sense_evt, crossed, ovp;
  logic signed [11:0] n_i;
  real eo, i_l, vdac;
  real i_load = 0.01, i_target = 0.01;

  int checks = 0, failures = 0;
  int n_cross = 0, n_notrip = 0, n_ovp = 0, n_cut = 0, n_reload = 0, n_terms = 0;

  dpwm_pol_top dut (
    .clk, .rst_n, .comp_in, .dac_code, .pwm,
    .tbl_we, .tbl_sel, .tbl_addr, .tbl_data,
    .u_k, .y1_k, .sense_evt, .crossed, .ovp, .n_i);

  atc_model #(.DAC_W(10), .VFS(1.7)) atc (.code(dac_code), .eo, .comp(comp_in), .vdac);
  buck_model plant (.clk, .pwm, .i_load, .eo, .i_l);

  always #1 clk = ~clk;   // 500 MHz

  // Load current slews towards its target at 50 A/us (0.1 A per 2 ns).
  always @(negedge clk) begin
    if (i_load < i_target) i_load = (i_target - i_load > 0.1) ? i_load + 0.1 : i_target;
    else if (i_load > i_target) i_load = (i_load - i_target > 0.1) ? i_load - 0.1 : i_target;
  end

  initial begin
    #2000000;   // 2 ms
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model of the controller ----------------
  real kp = 5.0, ki = 82.0 / 1024.0, kd = 0.0;
  int  mem2 [1024];
  int  mem3 [4096];
  int  m_ni = 0, m_y2 = 0;
  int  tcnt = 0;
  bit  comp_at [PERIOD];
  int  on_meas = 0;
  bit  skip_term = 0;   // set while a term cannot be predicted (table rewrite)
  bit  started = 0;     // no term has begun before the first count 0
  bit  reloading = 0;
  real vsum = 0.0; int vn = 0;
  bit trace = 0;
  initial trace = $test$plusargs("trace");

  function automatic int rnd(real r);
    return (r >= 0.0) ? int'($floor(r + 0.5)) : -int'($floor(-r + 0.5));
  endfunction

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  task automatic fill_tables(real p, real i);
    for (int k = 0; k < 1024; k++)
      mem2[k] = clampi(rnd(real'(UREF) - (p + i) * R_REF + (p + i + kd) * real'(k - 512)), 0, 511);
    for (int k = 0; k < 4096; k++)
      mem3[k] = clampi(rnd(i * real'((k >= 2048) ? k - 4096 : k) / (p + i + kd)), -512, 511);
    kp = p; ki = i;
  endtask

  initial fill_tables(kp, ki);

  // Evaluate the term that has just ended.
  task automatic close_term();
    int y1, a, start, addr, unew, on_exp;
    bit hit, ov;
    hit = 0; y1 = WIN_HI;
    for (int c = WIN_LO; c <= WIN_HI; c++)
      if (comp_at[c - 2]) begin hit = 1; y1 = c; break; end
    ov = hit && (y1 == WIN_LO);
    a = mem3[m_ni & 12'hFFF];
    start = clampi(a - 0 + 512, 0, 1023);     // b = 0 since KD = 0
    addr = clampi(start + y1, 0, 1023);
    unew = mem2[addr];
    // u(k) is 511 for counts 0..y1+1, then the new value.
    if (ov)       on_exp = y1 + 2;
    else if (!hit) on_exp = PERIOD;
    else          on_exp = (unew > y1 + 2) ? ((unew > PERIOD) ? PERIOD : unew) : y1 + 2;
    if (!skip_term) begin
      n_terms++;
      checks++;
      if (on_meas != on_exp) begin
        failures++;
        if (failures < 15)
          $display("%t term: on-time %0d expected %0d (y1=%0d hit=%b ov=%b u=%0d nI=%0d)",
                   $realtime, on_meas, on_exp, y1, hit, ov, unew, m_ni);
      end
      checks++;
      if (int'(y1_k) != y1 || int'(crossed) != int'(hit) || int'(ovp) != int'(ov)) begin
        failures++;
        if (failures < 15) $display("%t sensed y1=%0d cr=%b ov=%b, model %0d %b %b",
                                    $realtime, y1_k, crossed, ovp, y1, hit, ov);
      end
      if (ov) n_ovp++;
      else if (hit) n_cross++;
      else n_notrip++;
      if (hit && !ov && unew <= y1 + 2) n_cut++;
    end
    m_ni = clampi(m_ni + y1 - R_REF, -2048, 2047);
    m_y2 = y1;
    skip_term = reloading;
  endtask

  always @(posedge clk) begin
    if (!rst_n) begin
      tcnt <= 0;
    end else begin
      // the PWM output lags the count by one clock
      if (tcnt == 0 && !started) begin
        started = 1;
      end else if (tcnt == 0) begin
        on_meas += int'(pwm);
        close_term();
        on_meas = 0;
        checks++;
        if (int'(n_i) != m_ni && !skip_term) begin
          failures++;
          if (failures < 15) $display("%t nI=%0d model %0d", $realtime, n_i, m_ni);
        end
      end else begin
        on_meas += int'(pwm);
      end
      comp_at[tcnt] = comp_in;
      if (trace && tcnt == 0) $display("TRACE %0d us Eo=%f iL=%f nI=%0d u=%0d", int'($realtime / 1000.0), eo, i_l, n_i, u_k);
      tcnt <= (tcnt == PERIOD - 1) ? 0 : tcnt + 1;
    end
  end

  // Output-voltage excursion after a load step.
  real vmin = 9.0, vmax = -9.0;
  always @(posedge clk) begin
    if (eo < vmin) vmin = eo;
    if (eo > vmax) vmax = eo;
  end

  task automatic load_step(real target, string what);
    vmin = 9.0; vmax = -9.0;
    i_target = target;
    run_us(130);
    $display("%t %s: Eo range %f .. %f V", $realtime, what, vmin, vmax);
    checks++;
    if (vmin < 1.2 || vmax > 1.8) begin failures++; $display("  load-step excursion too large"); end
    check_vout(what);
  endtask

  // ---------------- stimulus ----------------
  task automatic run_us(int us);
    repeat (us * 500) @(posedge clk);
  endtask

  task automatic check_vout(string what);
    real avg;
    vsum = 0.0; vn = 0;
    repeat (20 * 500) begin
      @(posedge clk);
      vsum += eo; vn++;
    end
    avg = vsum / real'(vn);
    $display("%t %s: average Eo %f V, iL %f A", $realtime, what, avg, i_l);
    checks++;
    if (avg < 1.46 || avg > 1.54) begin
      failures++;
      $display("  output voltage out of regulation");
    end
  endtask

  task automatic reload_tables(real p, real i);
    fill_tables(p, i);
    reloading = 1;
    skip_term = 1;
    for (int k = 0; k < 1024; k++) begin
      tbl_we <= 1; tbl_sel <= dpwm_pkg::TBL_MEM2; tbl_addr <= 12'(k); tbl_data <= 16'(mem2[k]);
      @(posedge clk);
    end
    for (int k = 0; k < 4096; k++) begin
      tbl_we <= 1; tbl_sel <= dpwm_pkg::TBL_MEM3; tbl_addr <= 12'(k); tbl_data <= 16'(mem3[k] & 16'h3FF);
      @(posedge clk);
    end
    tbl_we <= 0;
    n_reload++;
    // the term in progress saw old and new entries
    while (tcnt != 1) @(posedge clk);
    reloading = 0;
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1;
    run_us(280);
    check_vout("light load 0.01 A");
    load_step(2.3, "step to heavy load 2.3 A");
    load_step(0.01, "step to light load 0.01 A");
    reload_tables(5.0, 0.0);
    run_us(200);
    check_vout("KP=5 KI=0, light load");
    load_step(2.3, "KP=5 KI=0, step to heavy load");
    load_step(0.01, "KP=5 KI=0, step to light load");
    $display("terms %0d: trip %0d, no trip %0d, over-voltage %0d, cut in same term %0d, reloads %0d",
             n_terms, n_cross, n_notrip, n_ovp, n_cut, n_reload);
    checks++; if (n_cross == 0)  begin failures++; $display("no comparator trip seen"); end
    checks++; if (n_notrip == 0) begin failures++; $display("no term without trip"); end
    checks++; if (n_ovp == 0)    begin failures++; $display("no over-voltage term"); end
    checks++; if (n_cut == 0)    begin failures++; $display("no same-term cut"); end
    checks++; if (n_reload == 0) begin failures++; $display("no table reload"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
