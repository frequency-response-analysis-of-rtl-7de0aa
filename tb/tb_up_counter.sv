// tb_up_counter: checks the switching-term counter against a cycle count.
// Runs three full terms at the default PERIOD (500) and checks every
// count value, the wrap from PERIOD-1 to 0 and the term length.
`timescale 1ns/1ps
module tb_up_counter;
  localparam int PERIOD = 500;
  logic clk = 0, rst_n = 0;
  logic [8:0] cnt;
  int checks = 0, failures = 0;
  int cyc;

  up_counter dut (.clk, .rst_n, .cnt);

  always #1 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_wrap, wraps;
    wraps = 0; last_wrap = -1;
    repeat (3) @(posedge clk);
    rst_n <= 1;               // cnt stays 0 during the cycle after this edge
    for (cyc = 0; cyc < 3 * PERIOD + 7; cyc++) begin
      #0.1;
      checks++;
      if (int'(cnt) != cyc % PERIOD) begin
        failures++;
        if (failures < 10) $display("cycle %0d: cnt=%0d expected %0d", cyc, cnt, cyc % PERIOD);
      end
      if (cnt == 0) begin
        if (last_wrap >= 0) begin
          checks++;
          if (cyc - last_wrap != PERIOD) begin
            failures++;
            $display("term length %0d expected %0d", cyc - last_wrap, PERIOD);
          end
        end
        last_wrap = cyc;
        wraps++;
      end
      @(posedge clk);
    end
    checks++;
    if (wraps != 4) begin failures++; $display("saw %0d term starts", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
