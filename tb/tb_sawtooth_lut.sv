// tb_sawtooth_lut: reads every entry of the default step-down sawtooth
// (1023 - 2i, floored at 0, one clock read latency), then overwrites a few
// entries through the write port and reads them back.
`timescale 1ns/1ps
module tb_sawtooth_lut;
  logic clk = 0;
  logic [8:0] addr, waddr;
  logic [9:0] code, wdata;
  logic we = 0;
  int checks = 0, failures = 0;

  sawtooth_lut dut (.clk, .addr, .code, .we, .waddr, .wdata);

  always #1 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_code(input int a, input int exp);
    addr <= 9'(a);
    @(posedge clk);
    #0.1;
    checks++;
    if (int'(code) != exp) begin
      failures++;
      if (failures < 10) $display("addr %0d: code %0d expected %0d", a, code, exp);
    end
  endtask

  initial begin
    waddr = '0; wdata = '0; addr = '0;
    @(posedge clk);
    for (int i = 0; i < 512; i++) expect_code(i, (2 * i > 1023) ? 0 : 1023 - 2 * i);
    // new waveform entries
    for (int i = 0; i < 4; i++) begin
      we <= 1; waddr <= 9'(100 + i); wdata <= 10'(7 * i + 3);
      @(posedge clk);
    end
    we <= 0;
    for (int i = 0; i < 4; i++) expect_code(100 + i, 7 * i + 3);
    expect_code(104, 1023 - 208);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
