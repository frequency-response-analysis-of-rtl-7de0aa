// tb_latch_gen: drives the latch-signal logic with a term counter and the
// window decodes of a 500-count term (window 3..496), and an asynchronous
// comparator signal. Checked per term: the event cycle (one clock after the
// synchronised trip is seen), y1, crossed and ovp, for a trip in mid-term,
// a trip already present at the first sample (over-voltage), no trip at all
// (event at the window end), a trip before the window opens, and a second
// trip in the same term (ignored).
`timescale 1ns/1ps
module tb_latch_gen;
  localparam int PERIOD = 500;
  logic clk = 0, rst_n = 0;
  logic comp_in = 0;
  logic [8:0] cnt = 0;
  logic pr, in_win, win_first, win_end;
  logic evt, crossed, ovp;
  logic [8:0] y1;
  int checks = 0, failures = 0;

  latch_gen dut (.clk, .rst_n, .comp_in, .cnt, .pr, .in_win, .win_first, .win_end,
                 .evt, .y1, .crossed, .ovp);

  always_comb begin
    pr        = (cnt == 9'(PERIOD - 1));
    win_first = (cnt == 9'd3);
    win_end   = (cnt == 9'(PERIOD - 4));
    in_win    = (cnt >= 9'd3) && (cnt <= 9'(PERIOD - 4));
  end

  always #1 clk = ~clk;
  always_ff @(posedge clk) cnt <= (!rst_n || cnt == 9'(PERIOD - 1)) ? '0 : cnt + 1'b1;

  initial begin
    #40000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Comparator waveform for one term: high from count rise_at to fall_at,
  // applied shortly after the clock edge (asynchronously).
  // Expected: event during count evt_cnt, with the given y1/crossed/ovp.
  task automatic run_term(input int rise_at, input int fall_at, input int evt_cnt,
                          input int exp_y1, input bit exp_cr, input bit exp_ov);
    int nevt;
    nevt = 0;
    do begin
      @(posedge clk);
      #0.3;
      comp_in = (int'(cnt) >= rise_at) && (int'(cnt) < fall_at);
      if (evt) begin
        nevt++;
        checks++;
        if (int'(cnt) != evt_cnt || int'(y1) != exp_y1 || crossed != exp_cr || ovp != exp_ov) begin
          failures++;
          $display("event at cnt %0d y1=%0d cr=%b ov=%b; expected cnt %0d y1=%0d cr=%b ov=%b",
                   cnt, y1, crossed, ovp, evt_cnt, exp_y1, exp_cr, exp_ov);
        end
      end
    end while (cnt != 9'(PERIOD - 1));
    checks++;
    if (nevt != 1) begin failures++; $display("%0d events in a term", nevt); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // align to the end of a term
    while (cnt != 9'(PERIOD - 1)) @(posedge clk);
    // trip at 150 -> seen synchronised at 152 -> event during 153
    run_term(150, 1000, 153, 152, 1, 0);
    // trip from before the window through the term: over-voltage at the first sample
    comp_in = 1;
    run_term(0, 1000, 4, 3, 1, 1);
    // no trip: event at the window end
    comp_in = 0;
    run_term(1000, 1000, PERIOD - 3, PERIOD - 4, 0, 0);
    // pulse before the window only (cleared by count 1): no trip in window
    run_term(0, 1, PERIOD - 3, PERIOD - 4, 0, 0);
    // two trips: only the first counts
    run_term(200, 210, 203, 202, 1, 0);
    run_term(300, 310, 303, 302, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
