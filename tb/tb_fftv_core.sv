// tb_fftv_core: self-checking testbench of the FFTV detection algorithm at its final settings
// (period 85..2666 clocks, tolerance 40, roll-over 4100, veto 40000 clocks).
//
// A cycle-level reference model written independently here follows the published rules and is
// compared with match_count, period_match and veto on every clock. Directed scenarios check
// the numbers that matter: a fixed 20 kHz trigger vetoes after exactly match-level matching
// periods (match-level + 1 triggers), one clock after the trigger, for exactly 40000 clocks;
// jittered periods inside the tolerance still match; 10 kHz (too slow) triggers never veto;
// triggers closer than the lower limit are skipped and merged into a longer period; periodic double triggers are still detected; roll-overs decrement the
// match counter; illegal match-levels act as 10; enable low clears everything. Random
// triggers then exercise the model comparison.
module tb_fftv_core;
  import fftv_pkg::*;

  localparam int unsigned PW = $clog2(PERIOD_ROLLOVER_DEF + 1);

  logic clk = 0, rst_n = 0, enable = 0, trig = 0;
  logic [3:0] match_level = 4'd10;
  logic veto, veto_start, period_match, rollover;
  logic [3:0] match_count;
  logic [PW-1:0] period_count;

  int checks = 0, failures = 0;
  int cycle = 0;
  int vetoes_seen = 0, matches_seen = 0, rolls_seen = 0;

  fftv_core dut (.*);

  always #5 clk = ~clk;

  // ---------------- reference model ----------------
  int m_cnt, m_prev, m_match, m_left;
  bit m_pv;
  int m_lvl;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst_n || !enable) begin
      m_cnt = 0; m_prev = 0; m_pv = 0; m_match = 0; m_left = 0;
    end else begin
      bit hit, dec, rv;
      m_lvl = (match_level < 2 || match_level > 10) ? 10 : int'(match_level);
      hit = 0; dec = 0; rv = 0;
      if (trig && m_cnt >= 85) begin
        if (m_cnt <= 2666) begin
          if (m_pv) begin
            if ((m_cnt > m_prev ? m_cnt - m_prev : m_prev - m_cnt) <= 40) hit = 1;
            else dec = 1;
          end
          m_prev = m_cnt; m_pv = 1;
        end else m_pv = 0;
        m_cnt = 0;
      end else if (!trig && m_cnt >= 4100) begin
        m_cnt = 0; m_pv = 0; dec = 1;
      end else m_cnt = m_cnt + 1;
      if (hit && m_match < 15) m_match++;
      if (dec && m_match > 0) m_match--;
      if (hit && m_match >= m_lvl && m_left == 0) rv = 1;
      if (rv) m_left = 40000; else if (m_left > 0) m_left--;
    end
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (match_count != 4'(m_match) || veto != (m_left > 0)) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH cycle %0d: match %0d/%0d veto %0b/%0b", cycle, match_count, m_match,
                 veto, m_left > 0);
    end
    if (veto_start)   vetoes_seen++;
    if (period_match) matches_seen++;
    if (rollover)     rolls_seen++;
  end

  // ---------------- helpers ----------------
  task automatic pulse();
    trig <= 1; @(posedge clk); trig <= 0;
  endtask

  task automatic wait_cycles(int n);
    repeat (n) @(posedge clk);
  endtask

  // Every call is made at a falling edge, after the rising edge's updates have settled.
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (cycle %0d)", what, cycle); end
  endtask

  task automatic restart();
    enable <= 0; wait_cycles(3); enable <= 1; @(posedge clk);
  endtask

  // periodic train: n triggers spaced p clocks (first one p clocks from now)
  task automatic train(int n, int p);
    for (int i = 0; i < n; i++) begin wait_cycles(p - 1); pulse(); end
  endtask

  int t_start, t_veto, width;
  int jit[6] = '{2400, 2438, 2400, 2362, 2380, 2420};  // successive steps within 40

  initial begin
    wait_cycles(4); rst_n <= 1; wait_cycles(2); enable <= 1; @(posedge clk);

    // 1. 20 kHz fixed frequency, level 10: the 11th in-window trigger raises the veto.
    wait_cycles(3000); pulse();                      // too long: reference only
    train(10, 2000);                                 // period stored + 9 matches
    @(negedge clk);
    check(!veto && match_count == 9, "9 matches, no veto yet");
    wait_cycles(1999); trig <= 1; @(posedge clk); trig <= 0; t_start = cycle;
    @(negedge clk);
    check(veto && veto_start, "veto one clock after the 11th trigger");
    width = 0;
    while (veto) begin @(posedge clk); width++; @(negedge clk); end
    @(negedge clk);
    check(width == 40000, $sformatf("veto lasts 40000 clocks (got %0d)", width));

    // 2. jitter within tolerance still matches, level 5
    restart(); match_level <= 4'd5;
    wait_cycles(3000); pulse();
    foreach (jit[i]) begin wait_cycles(jit[i] - 1); pulse(); end
    @(negedge clk);
    check(veto, "jittered 16.7 kHz triggers veto at level 5");
    wait_cycles(41000);

    // 3. 10 kHz (period 4000 > 2666): ignored
    restart(); match_level <= 4'd2;
    train(20, 4000);
    @(negedge clk);
    check(match_count == 0 && !veto, "10 kHz triggers pass");

    // 4. 500 kHz (period 80 < 85): every other trigger is ignored, so the 160-clock period
    //    is what is matched; level 2 needs the 6th trigger after the reference.
    restart(); match_level <= 4'd2;
    wait_cycles(3000); pulse();
    train(5, 80);
    @(negedge clk);
    check(!veto && match_count == 1, "short periods ignored: 1 match after 5 triggers");
    train(1, 80);
    @(negedge clk);
    check(veto, "160-clock component vetoed after the 6th trigger");
    wait_cycles(41000);

    // 5. periodic double triggers (pairs 30 clocks apart every 2200 clocks) still detected
    restart(); match_level <= 4'd10;
    wait_cycles(3000); pulse();
    for (int i = 0; i < 11; i++) begin wait_cycles(2169); pulse(); wait_cycles(29); pulse(); end
    @(negedge clk);
    check(veto, "double-trigger pattern vetoed");
    wait_cycles(41000);

    // 6. roll-over decrements the match counter
    restart(); match_level <= 4'd10;
    wait_cycles(3000); pulse(); train(5, 2000);
    @(negedge clk);
    check(match_count == 4, "4 matches before roll-over");
    wait_cycles(4200);
    @(negedge clk);
    check(match_count == 3 && rolls_seen > 0, "roll-over decremented match counter");

    // 7. illegal level 15 acts as 10; level 3 vetoes after 3 matches
    restart(); match_level <= 4'd15;
    wait_cycles(3000); pulse(); train(10, 2500);
    @(negedge clk);
    check(!veto && match_count == 9, "level 15 behaves as 10");
    restart(); match_level <= 4'd3;
    wait_cycles(3000); pulse(); train(4, 2500);
    @(negedge clk);
    check(veto, "level 3 vetoes after 4 triggers");
    enable <= 0; @(posedge clk); @(negedge clk);
    check(!veto && match_count == 0, "disable clears veto and count");
    enable <= 1;

    // 8. random triggers compared with the model
    match_level <= 4'd2;
    for (int i = 0; i < 3000; i++) begin
      wait_cycles(1 + ($urandom % 600) + (($urandom % 4 == 0) ? 2000 : 0));
      pulse();
    end

    @(negedge clk);
    check(vetoes_seen >= 4 && matches_seen > 0, "vetoes and matches observed");
    $display("vetoes %0d matches %0d rollovers %0d", vetoes_seen, matches_seen, rolls_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 4_000_000);
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
