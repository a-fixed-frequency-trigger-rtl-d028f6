// tb_fftv_table1: the veto algorithm with the illustrative settings used to demonstrate it
// (lower limit 2200, upper 2850, roll-over 4100, tolerance 127, match-level 5, veto 8000 clocks
// = 200 us).
//
// Three demonstrations, each checked against values worked out here:
//   1. triggers every 2400 clocks (16.7 kHz) with small jitter: the 6th trigger (5 matching
//      periods) raises the veto for exactly 8000 clocks; during the veto the match count
//      decreases only through roll-overs (every 4100 clocks without a trigger);
//   2. double triggers (a second one 100 clocks after each) with a 2400-clock repetition are
//      still vetoed, the close second triggers being skipped;
//   3. 10 kHz triggers (above the upper period) and 40 kHz triggers (whose merged periods of
//      1000, 2000, 3000 clocks all fall outside 2200..2850) never raise the veto.
module tb_fftv_table1;
  logic clk = 0, rst_n = 0, enable = 0, trig = 0;
  logic [3:0] match_level = 4'd5;
  logic veto, veto_start, period_match, rollover;
  logic [3:0] match_count;
  logic [12:0] period_count;
  int checks = 0, failures = 0, width, n_pm = 0;

  fftv_core #(.PERIOD_MIN(2200), .PERIOD_MAX(2850), .PERIOD_ROLLOVER(4100), .MATCH_TOL(127),
              .VETO_DURATION(8000)) dut (.*);

  always #12.5 clk = ~clk;
  always @(negedge clk) if (period_match) n_pm++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  task automatic pulse_after(int n);
    repeat (n - 1) @(negedge clk);
    trig = 1; @(negedge clk); trig = 0;
  endtask

  int jit[6] = '{2400, 2450, 2380, 2420, 2390, 2470};
  initial begin
    repeat (3) @(negedge clk); rst_n = 1; enable = 1;
    // 1. from enable, 6 periodic triggers: 5 matches
    foreach (jit[i]) begin
      pulse_after(jit[i]);
      check(veto == (i == 5), $sformatf("veto only after trigger 6 (trigger %0d)", i + 1));
    end
    @(negedge clk);
    check(match_count == 5 && n_pm == 5, $sformatf("5 matches (%0d, %0d pulses)", match_count, n_pm));
    width = 1;   // one veto clock has already passed
    while (veto) begin @(negedge clk); width++; end
    check(width == 8000, "veto lasts 8000 clocks (200 us)");
    check(match_count == 4, "one roll-over during the veto (4100 < 8000 < 8200)");
    repeat (1000) @(negedge clk);
    check(match_count == 3, "second roll-over after 8200 clocks");
    // 2. double triggers
    enable = 0; @(negedge clk); enable = 1;
    for (int i = 0; i < 6; i++) begin pulse_after(2300); pulse_after(100); end
    check(veto, "double-trigger pattern vetoed");
    while (veto) @(negedge clk);
    // 3. 10 kHz and 40 kHz
    enable = 0; @(negedge clk); enable = 1;
    for (int i = 0; i < 10; i++) pulse_after(4000);
    check(!veto && match_count == 0, "10 kHz ignored");
    for (int i = 0; i < 40; i++) pulse_after(1000);
    check(!veto && match_count == 0, "40 kHz ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(25 * 200_000);
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
