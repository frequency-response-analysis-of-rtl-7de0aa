// tb_duty_register: checks D-FF4 against a reference model under random
// sequences of PR, latch events (crossed / over-voltage / no trip) and
// memory-2 values: preset to 511 on PR, load on a crossed event, clear on
// over-voltage, hold otherwise.
`timescale 1ns/1ps
module tb_duty_register;
  logic clk = 0, rst_n = 0;
  logic pr = 0, evt = 0, crossed = 0, ovp = 0;
  logic [8:0] u_mem = 0, u;
  int checks = 0, failures = 0;
  int m_u;
  int n_pr = 0, n_ld = 0, n_ov = 0, n_hold = 0;

  duty_register dut (.clk, .rst_n, .pr, .evt, .crossed, .ovp, .u_mem, .u);

  always #1 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    m_u = 511;
    for (int i = 0; i < 2000; i++) begin
      int kind;
      kind = int'($urandom_range(0, 4));
      pr      <= (kind == 0);
      evt     <= (kind >= 2);
      crossed <= (kind >= 3);
      ovp     <= (kind == 4) && $urandom_range(0, 1) == 1;
      u_mem   <= 9'($urandom);
      @(posedge clk);
      if (pr) begin m_u = 511; n_pr++; end
      else if (evt && ovp) begin m_u = 0; n_ov++; end
      else if (evt && crossed) begin m_u = int'(u_mem); n_ld++; end
      else n_hold++;
      #0.1;
      checks++;
      if (int'(u) != m_u) begin
        failures++;
        if (failures < 10) $display("step %0d: u=%0d expected %0d", i, u, m_u);
      end
    end
    checks++;
    if (n_pr == 0 || n_ld == 0 || n_ov == 0 || n_hold == 0) begin failures++; $display("case missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
