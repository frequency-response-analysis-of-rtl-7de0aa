// pr_generator: PR (preset) strobe and sensing-window timing.
//
// Decodes the up-counter. pr is high in the last count of each switching
// term; on that clock edge D-FF4 is preset to its maximum and the
// programmable counter is loaded for the next term, as the reference design
// describes. The sensing window strobes are this design's own addition that
// makes the per-term sequencing explicit: the comparator result for count c
// reaches the controller SENSE_LAT cycles later, so the window opens at
// count SENSE_LAT (win_first, which compares Eo with the highest DAC level
// Vref+) and closes at PERIOD-4 (win_end), leaving three counts in which the
// integral, memory 3 and memory 4 are updated before the next term starts.
// All outputs are combinational decodes of cnt.
module pr_generator #(
  parameter int unsigned PERIOD    = dpwm_pkg::PERIOD_DEF,
  parameter int unsigned CNT_W     = dpwm_pkg::CNT_W_DEF,
  parameter int unsigned SENSE_LAT = 3
) (
  input  logic [CNT_W-1:0] cnt,
  output logic             pr,
  output logic             in_win,
  output logic             win_first,
  output logic             win_end
);
  localparam logic [CNT_W-1:0] LAST  = CNT_W'(PERIOD - 1);
  localparam logic [CNT_W-1:0] FIRST = CNT_W'(SENSE_LAT);
  localparam logic [CNT_W-1:0] WEND  = CNT_W'(PERIOD - 4);

  always_comb begin
    pr        = (cnt == LAST);
    win_first = (cnt == FIRST);
    win_end   = (cnt == WEND);
    in_win    = (cnt >= FIRST) && (cnt <= WEND);
  end

  initial assert (SENSE_LAT + 4 < PERIOD)
    else $error("sensing window is empty");
endmodule
