// tb_integral_lut: reads all 4096 entries of memory 3 and compares each with
// a = KI*nI/(KP+KI+KD) computed in floating point and rounded to nearest
// (KP=5, KI=82/1024, KD=0), then checks the write port.
`timescale 1ns/1ps
module tb_integral_lut;
  logic clk = 0;
  logic signed [11:0] n_i = 0;
  logic signed [9:0] a;
  logic we = 0;
  logic [11:0] waddr = 0;
  logic [9:0] wdata = 0;
  int checks = 0, failures = 0;

  integral_lut dut (.clk, .n_i, .a, .we, .waddr, .wdata);

  always #1 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_a(int n);
    real r;
    r = (real'(n) * 0.080078125) / (5.0 + 0.080078125);
    return (r >= 0.0) ? int'($floor(r + 0.5)) : -int'($floor(-r + 0.5));
  endfunction

  task automatic expect_a(input int n, input int exp);
    n_i <= 12'(n);
    @(posedge clk);
    #0.1;
    checks++;
    if (int'(a) != exp) begin
      failures++;
      if (failures < 10) $display("nI=%0d: a=%0d expected %0d", n, a, exp);
    end
  endtask

  initial begin
    @(posedge clk);
    for (int n = -2048; n < 2048; n++) expect_a(n, ref_a(n));
    we <= 1; waddr <= 12'hFFF; wdata <= 10'(-5);
    @(posedge clk);
    we <= 0;
    expect_a(-1, -5);
    expect_a(2047, ref_a(2047));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
