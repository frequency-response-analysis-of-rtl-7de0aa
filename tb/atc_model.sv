// atc_model: behavioural model of the analog timing converter, the external
// DAC plus analog comparator that sense the converter output voltage.
// Not synthesizable logic: it stands for two bought-in analog parts (a
// 10-bit current-output DAC and a fast comparator) so the controller can be
// simulated in closed loop. The DAC output is VFS * code / (2^DAC_W - 1),
// with VFS the top of the sweep (Vref+ = 1.7 V); the comparator output is 1
// while eo is above that voltage. Both are ideal and have no delay, so the
// controller's EXT_LAT parameter is 0 with this model.
module atc_model #(
  parameter int unsigned DAC_W = 10,
  parameter real         VFS   = 1.7
) (
  input  logic [DAC_W-1:0] code,
  input  real              eo,
  output logic             comp,
  output real              vdac
);
  always_comb begin
    vdac = VFS * real'(code) / real'((1 << DAC_W) - 1);
    comp = (eo > vdac);
  end
endmodule
