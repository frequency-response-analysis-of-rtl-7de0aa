// tb_dpwm_comparator: for a set of u values, runs a 500-count term and
// checks that the registered PWM output follows (count < u) one clock
// later, and that the on-time of the term equals min(u, 500).
`timescale 1ns/1ps
module tb_dpwm_comparator;
  logic clk = 0, rst_n = 0;
  logic [8:0] cnt = 0, u = 0;
  logic pwm;
  int checks = 0, failures = 0;

  dpwm_comparator dut (.clk, .rst_n, .cnt, .u, .pwm);

  always #1 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int uv [10] = '{0, 1, 2, 125, 250, 300, 498, 499, 500, 511};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    foreach (uv[j]) begin
      int on;
      on = 0;
      u <= 9'(uv[j]);
      for (int c = 0; c < 500; c++) begin
        cnt <= 9'(c);
        @(posedge clk);
        #0.1;
        checks++;
        if (pwm != (c < uv[j])) begin
          failures++;
          if (failures < 10) $display("u=%0d cnt=%0d pwm=%b", uv[j], c, pwm);
        end
        on += int'(pwm);
      end
      checks++;
      if (on != ((uv[j] > 500) ? 500 : uv[j])) begin
        failures++;
        $display("u=%0d on-time %0d", uv[j], on);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
