// sawtooth_lut: memory 1, the DAC waveform table.
//
// Addressed by the up-counter, it gives the code sent to the external DAC
// every system clock. The analog comparator compares the converter output
// Eo with that DAC voltage, so the table shape sets how Eo is turned into a
// time. The reference design uses a step-down sawtooth starting at the DAC's
// maximum (Vref+) and notes that any waveform could be stored; the default
// content here is code(i) = 2^DAC_W-1 - DAC_STEP*i, floored at 0, and the
// write port allows another waveform to be loaded at run time (the write
// port and the slope are this design's choices).
// Timing: registered read, code is valid one clock after addr.
module sawtooth_lut #(
  parameter int unsigned CNT_W    = dpwm_pkg::CNT_W_DEF,
  parameter int unsigned DAC_W    = dpwm_pkg::DAC_W_DEF,
  parameter int unsigned DAC_STEP = dpwm_pkg::DAC_STEP_DEF
) (
  input  logic             clk,
  input  logic [CNT_W-1:0] addr,
  output logic [DAC_W-1:0] code,
  input  logic             we,
  input  logic [CNT_W-1:0] waddr,
  input  logic [DAC_W-1:0] wdata
);
  localparam int unsigned DEPTH = 1 << CNT_W;
  localparam int          TOP   = (1 << DAC_W) - 1;

  logic [DAC_W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      int v;
      v = TOP - int'(DAC_STEP) * i;
      mem[i] = DAC_W'((v < 0) ? 0 : v);
    end
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    code <= mem[addr];
  end
endmodule
