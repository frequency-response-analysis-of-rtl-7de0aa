// buck_model: behavioural model of the synchronous buck power stage, with a
// controlled load current, for closed-loop simulation of the controller.
// Not synthesizable: real-valued forward-Euler integration, one step of DT
// seconds per falling clock edge (so the values are stable at the rising
// edge where the controller samples). Switch node = EI while pwm is 1, else
// 0 (synchronous rectification, continuous conduction). The inductor has a
// series resistance DCR, the output capacitor an ESR; eo is the voltage at
// the capacitor terminals, including the ESR drop.
// Defaults: EI = 6 V, L = 10 uH, C = 105 uF at 1 MHz switching from a
// 500 MHz clock (DT = 2 ns); DCR and ESR are assumed values.
module buck_model #(
  parameter real EI  = 6.0,
  parameter real L   = 10.0e-6,
  parameter real C   = 105.0e-6,
  parameter real DCR = 20.0e-3,
  parameter real ESR = 100.0e-3,
  parameter real DT  = 2.0e-9
) (
  input  logic clk,
  input  logic pwm,
  input  real  i_load,
  output real  eo,
  output real  i_l
);
  real vc;

  initial begin
    vc  = 0.0;
    i_l = 0.0;
  end

  always_comb eo = vc + ESR * (i_l - i_load);

  always @(negedge clk) begin
    real vsw, dil, dvc;
    vsw = pwm ? EI : 0.0;
    dil = (vsw - i_l * DCR - eo) / L * DT;
    dvc = (i_l - i_load) / C * DT;
    i_l <= i_l + dil;
    vc  <= vc + dvc;
  end
endmodule
