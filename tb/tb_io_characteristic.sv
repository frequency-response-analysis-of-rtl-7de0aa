// tb_io_characteristic: static input-output characteristic of the
// controller, on-time against output voltage, with the loop open.
//
// The output voltage is set directly by the testbench (no power stage) and
// swept from 0 to 1.8 V in 5 mV steps through the DAC/comparator model. For
// each level the controller runs three switching periods and the on-time of
// the last one is measured. Proportional control only (KI = KD = 0, memory 3
// cleared through the table-write port), first with the linear table of
// KP = 5, then with a nonlinear table (gain 5 within +-10 counts of the
// reference, gain 15 outside) written through the same port, showing that the
// table can hold any control curve.
// Expected on-time, computed here from the sweep: the sensed count y1 is the
// first count c in 3..496 whose sample, the DAC code 1023 - 2(c-3), is below
// Eo; the on-time is max(u(y1), y1 + 2) capped at 500, 5 when the trip is at
// the first sample (over-voltage), and 500 when nothing trips.
`timescale 1ns/1ps
module tb_io_characteristic;
  localparam int PERIOD = 500;
  localparam int R_REF = 63, UREF = 125;

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
  real eo = 0.0, vdac;

  int checks = 0, failures = 0;
  int n_ovp = 0, n_none = 0, n_lin = 0, n_sat = 0;
  int mem2 [1024];

  dpwm_pol_top dut (
    .clk, .rst_n, .comp_in, .dac_code, .pwm,
    .tbl_we, .tbl_sel, .tbl_addr, .tbl_data,
    .u_k, .y1_k, .sense_evt, .crossed, .ovp, .n_i);

  atc_model #(.DAC_W(10), .VFS(1.7)) atc (.code(dac_code), .eo, .comp(comp_in), .vdac);

  always #1 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // count within the period, mirrored from reset
  int tcnt = 0;
  int on_now = 0, on_last = 0;
  always @(posedge clk) begin
    if (!rst_n) tcnt <= 0;
    else begin
      // pwm lags the count by one clock: count 1..0 of the next period
      if (tcnt == 0) begin
        on_last = on_now + int'(pwm);
        on_now = 0;
      end else on_now += int'(pwm);
      tcnt <= (tcnt == PERIOD - 1) ? 0 : tcnt + 1;
    end
  end

  task automatic write_tables(bit nonlinear);
    for (int k = 0; k < 1024; k++) begin
      int e;
      e = k - 512 - R_REF;
      if (!nonlinear || (e >= -10 && e <= 10)) mem2[k] = clampi(UREF + 5 * e, 0, 511);
      else if (e > 10) mem2[k] = clampi(UREF + 50 + 15 * (e - 10), 0, 511);
      else             mem2[k] = clampi(UREF - 50 + 15 * (e + 10), 0, 511);
      tbl_we <= 1; tbl_sel <= dpwm_pkg::TBL_MEM2; tbl_addr <= 12'(k); tbl_data <= 16'(mem2[k]);
      @(posedge clk);
    end
    for (int k = 0; k < 4096; k++) begin
      tbl_we <= 1; tbl_sel <= dpwm_pkg::TBL_MEM3; tbl_addr <= 12'(k); tbl_data <= '0;
      @(posedge clk);
    end
    tbl_we <= 0;
  endtask

  function automatic int expected_on(real v);
    for (int c = 3; c <= PERIOD - 4; c++) begin
      int code;
      code = 1023 - 2 * (c - 3);
      if (code < 0) code = 0;
      if (v > 1.7 * real'(code) / 1023.0) begin
        int u;
        if (c == 3) return 5;
        u = mem2[clampi(512 + c, 0, 1023)];
        if (u < c + 2) u = c + 2;
        return (u > PERIOD) ? PERIOD : u;
      end
    end
    return PERIOD;
  endfunction

  task automatic sweep(string what);
    int last_print;
    last_print = -1;
    for (int mv = 0; mv <= 1800; mv += 5) begin
      int exp;
      eo = real'(mv) / 1000.0;
      // run until three period boundaries have passed
      repeat (3) begin
        @(posedge clk);
        while (tcnt != 0) @(posedge clk);
      end
      exp = expected_on(eo);
      checks++;
      if (on_last != exp) begin
        failures++;
        if (failures < 10) $display("%s Eo=%0d mV: on-time %0d expected %0d", what, mv, on_last, exp);
      end
      if (exp == 5 && mv > 1690) n_ovp++;
      else if (exp == PERIOD) n_none++;
      else if (exp > 0 && exp < PERIOD) n_lin++;
      if (mv % 50 == 0)
        $display("%s Eo=%4d mV  on-time %3d (%5.1f %%)", what, mv, on_last, 100.0 * on_last / PERIOD);
    end
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1;
    write_tables(0);
    sweep("KP=5     ");
    write_tables(1);
    sweep("nonlinear");
    checks++;
    if (n_ovp == 0 || n_none == 0 || n_lin == 0) begin
      failures++;
      $display("characteristic not covered: ovp %0d none %0d linear %0d", n_ovp, n_none, n_lin);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
