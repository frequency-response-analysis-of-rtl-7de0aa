// tb_pid_state: random latch events with random y1 values; a reference
// model computes e = y1 - 63, nI += e with saturation at the signed
// 12-bit limits, and y2 = y1. Long runs of large errors of one sign drive
// nI into both saturation limits.
`timescale 1ns/1ps
module tb_pid_state;
  logic clk = 0, rst_n = 0;
  logic evt = 0;
  logic [8:0] y1 = 0;
  logic signed [11:0] n_i;
  logic [8:0] y2;
  logic upd;
  int checks = 0, failures = 0;
  int m_ni = 0, m_y2 = 0;
  int sat_hi = 0, sat_lo = 0;

  pid_state dut (.clk, .rst_n, .evt, .y1, .n_i, .y2, .upd);

  always #1 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_event(input int yv);
    @(posedge clk);
    evt <= 1; y1 <= 9'(yv);
    @(posedge clk);
    evt <= 0;
    m_ni = m_ni + (yv - 63);
    if (m_ni > 2047)  begin m_ni = 2047;  sat_hi++; end
    if (m_ni < -2048) begin m_ni = -2048; sat_lo++; end
    m_y2 = yv;
    #0.1;
    checks++;
    if (int'(n_i) != m_ni || int'(y2) != m_y2 || !upd) begin
      failures++;
      if (failures < 10) $display("y1=%0d: nI=%0d y2=%0d upd=%b expected nI=%0d y2=%0d",
                                  yv, n_i, y2, upd, m_ni, m_y2);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 200; i++) one_event(100 + int'($urandom_range(0, 46)));
    for (int i = 0; i < 20; i++)  one_event(500);   // e = +437 -> high limit
    for (int i = 0; i < 80; i++)  one_event(3);     // e = -60 -> low limit
    for (int i = 0; i < 200; i++) one_event(int'($urandom_range(0, 511)));
    // no event: state holds
    repeat (5) @(posedge clk);
    #0.1;
    checks++;
    if (int'(n_i) != m_ni || upd) begin failures++; $display("state changed without event"); end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin failures++; $display("saturation not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
