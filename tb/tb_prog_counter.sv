// tb_prog_counter: loads random offsets a, b and checks that the counter
// then reads a - b + 512 + (cycles since load) every cycle, saturating at
// 0 (for a start value below range) and at 1023.
`timescale 1ns/1ps
module tb_prog_counter;
  logic clk = 0, rst_n = 0;
  logic load = 0;
  logic signed [9:0] a = 0, b = 0;
  logic [9:0] addr;
  int checks = 0, failures = 0;
  int sat_seen = 0;

  prog_counter dut (.clk, .rst_n, .load, .a, .b, .addr);

  always #1 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_term(input int av, input int bv, input int len);
    int start, exp;
    @(posedge clk);
    load <= 1; a <= 10'(av); b <= 10'(bv);
    @(posedge clk);
    load <= 0;
    start = av - bv + 512;
    if (start < 0) start = 0;
    if (start > 1023) start = 1023;
    for (int k = 0; k < len; k++) begin
      #0.1;
      exp = start + k;
      if (exp > 1023) begin exp = 1023; sat_seen++; end
      checks++;
      if (int'(addr) != exp) begin
        failures++;
        if (failures < 10) $display("a=%0d b=%0d k=%0d: addr=%0d expected %0d", av, bv, k, addr, exp);
      end
      @(posedge clk);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    one_term(0, 0, 500);
    for (int i = 0; i < 20; i++)
      one_term(int'($urandom_range(0, 200)) - 100, int'($urandom_range(0, 60)), 500);
    one_term(511, -512, 40);    // start clamps to 1023
    one_term(-512, 511, 40);    // start clamps to 0
    one_term(300, 0, 500);      // runs into the top and holds
    checks++;
    if (sat_seen == 0) begin failures++; $display("no saturation seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
