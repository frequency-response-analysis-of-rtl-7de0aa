// tb_pr_generator: checks the PR strobe and the sensing-window decodes for
// every counter value, at the default PERIOD (500) and SENSE_LAT (3):
// PR at 499, window 3..496, first sample 3, last sample 496.
`timescale 1ns/1ps
module tb_pr_generator;
  logic [8:0] cnt;
  logic pr, in_win, win_first, win_end;
  int checks = 0, failures = 0;

  pr_generator dut (.cnt, .pr, .in_win, .win_first, .win_end);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 512; c++) begin
      logic e_pr, e_in, e_first, e_end;
      cnt = 9'(c);
      #1;
      e_pr    = (c == 499);
      e_in    = (c >= 3 && c <= 496);
      e_first = (c == 3);
      e_end   = (c == 496);
      checks++;
      if ({pr, in_win, win_first, win_end} != {e_pr, e_in, e_first, e_end}) begin
        failures++;
        $display("cnt=%0d got %b%b%b%b expected %b%b%b%b", c, pr, in_win, win_first, win_end,
                 e_pr, e_in, e_first, e_end);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
