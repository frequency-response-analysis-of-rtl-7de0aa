// tb_duty_lut: reads all 1024 entries of memory 2 and compares each with the
// PID duty law u = uref - (KP+KI)*r + A*address', A = KP+KI+KD, computed in
// floating point (uref=125, r=63, KP=5, KI=82/1024, KD=0,
// address' = index - 512), rounded and clamped to 0..511; then checks the
// write port.
`timescale 1ns/1ps
module tb_duty_lut;
  logic clk = 0;
  logic [9:0] addr = 0;
  logic [8:0] u;
  logic we = 0;
  logic [9:0] waddr = 0;
  logic [8:0] wdata = 0;
  int checks = 0, failures = 0;
  int n_lo = 0, n_hi = 0, n_mid = 0;

  duty_lut dut (.clk, .addr, .u, .we, .waddr, .wdata);

  always #1 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_u(int idx);
    real kp, ki, r;
    int v;
    kp = 5.0; ki = 82.0 / 1024.0;
    r = 125.0 - (kp + ki) * 63.0 + (kp + ki) * real'(idx - 512);
    v = (r >= 0.0) ? int'($floor(r + 0.5)) : -int'($floor(-r + 0.5));
    if (v < 0) v = 0;
    if (v > 511) v = 511;
    return v;
  endfunction

  task automatic expect_u(input int i, input int exp);
    addr <= 10'(i);
    @(posedge clk);
    #0.1;
    checks++;
    if (int'(u) != exp) begin
      failures++;
      if (failures < 10) $display("addr %0d: u=%0d expected %0d", i, u, exp);
    end
  endtask

  initial begin
    @(posedge clk);
    for (int i = 0; i < 1024; i++) begin
      int e;
      e = ref_u(i);
      if (e == 0) n_lo++; else if (e == 511) n_hi++; else n_mid++;
      expect_u(i, e);
    end
    // the steady-state point: address' = r gives u = uref
    expect_u(512 + 63, 125);
    we <= 1; waddr <= 10'd600; wdata <= 9'd77;
    @(posedge clk);
    we <= 0;
    expect_u(600, 77);
    checks++;
    if (n_lo == 0 || n_hi == 0 || n_mid < 50) begin failures++; $display("table range not covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
