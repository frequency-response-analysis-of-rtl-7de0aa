// tb_deriv_lut: memory 4 with a non-zero derivative gain (KD = 2.0, so the
// entries are not all zero): every entry is compared with
// b = KD*y2/(KP+KI+KD) computed in floating point and rounded, then the
// write port is checked. A second instance with the default KD = 0 must
// read 0 everywhere.
`timescale 1ns/1ps
module tb_deriv_lut;
  logic clk = 0;
  logic [8:0] y2 = 0;
  logic signed [9:0] b, b0;
  logic we = 0;
  logic [8:0] waddr = 0;
  logic [9:0] wdata = 0;
  int checks = 0, failures = 0;

  deriv_lut #(.KD_Q(2048)) dut (.clk, .y2, .b, .we, .waddr, .wdata);
  deriv_lut dut0 (.clk, .y2, .b(b0), .we(1'b0), .waddr('0), .wdata('0));

  always #1 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_b(int y);
    real r;
    r = (real'(y) * 2.0) / (5.0 + 0.080078125 + 2.0);
    return int'($floor(r + 0.5));
  endfunction

  task automatic expect_b(input int y, input int exp, input int exp0);
    y2 <= 9'(y);
    @(posedge clk);
    #0.1;
    checks++;
    if (int'(b) != exp || int'(b0) != exp0) begin
      failures++;
      if (failures < 10) $display("y2=%0d: b=%0d (KD=0: %0d) expected %0d", y, b, b0, exp);
    end
  endtask

  initial begin
    @(posedge clk);
    for (int y = 0; y < 512; y++) expect_b(y, ref_b(y), 0);
    we <= 1; waddr <= 9'd7; wdata <= 10'(-3);
    @(posedge clk);
    we <= 0;
    expect_b(7, -3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
