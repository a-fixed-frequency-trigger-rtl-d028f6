// tb_fftv_system: end-to-end testbench of the crate-level veto (TIM + one ROD) at the default,
// final settings, with no parameter overrides.
//
// One complete operation of each mechanism, counted, with a failure for any that never
// happens:
//   random  - the TIM internal random generator (about 80 kHz, bunch spacing 22 then 1) runs
//             for a while; its triggers reach trigger_out and are numbered;
//   sa_veto - a fixed 20 kHz NIM trigger is vetoed in stand-alone mode; later NIM triggers are
//             inhibited at the source; busy to the CTP for exactly 40000 clocks;
//   short / long - triggers closer than 85 clocks are skipped, periods above 2666 are ignored;
//   rollover - the period counter rolls over and decrements the match counter;
//   lea     - fixed-frequency TTC triggers go on after the veto: Local Emergency Action, TIM-OK
//             drops, Clear-LEA after the veto releases it;
//   rod_veto / rod_blank - ROD serial commands at 20 kHz raise the ROD veto, which reaches the
//             CTP busy through ROD0-Busy; a late command is removed from the ROD output line;
//   regs    - the counters are read back through the register port.
module tb_fftv_system;
  import fftv_pkg::*;
  logic clk = 0, rst_n = 0;
  logic nim_in = 0, ecl_in = 0, int_enable = 0, ecr = 0, ttc_trig = 0, ttc_clk_ok = 1;
  logic [4:0] freq_setting = 5'd14;
  logic [7:0] bunch_spacing = 8'd1;
  logic [15:0] rod_busy_in = 0;
  logic rod_busy_out, trigger_out, tim_ok, sa_num_valid, ttc_num_valid;
  logic [23:0] sa_trig_num, ttc_trig_num;
  logic fftv_jumper = 0;
  logic [7:0] reg_addr = 0; logic reg_wr = 0; logic [15:0] reg_wdata = 0, reg_rdata;
  logic tim_veto, tim_lea_active, tim_period_match;
  logic [3:0] tim_match_count;
  logic [12:0] tim_period_count;
  logic rod_ser_in = 0, rod_ser_out, rod_pixel = 0;
  logic [3:0] rod_match_level = 4'd10;
  logic rod_emergency_clear = 0, rod_count_clear = 0, rod_id_clear = 0;
  logic [23:0] rod_busy_time; logic [7:0] rod_veto_id;
  logic rod_busy_time_roll, rod_veto_id_roll, rod_busy_active, rod_busy_active_latch;
  logic rod_emergency_active, rod_emergency_latch, rod_trig_detected, rod_veto;

  fftv_system dut (.*);

  always #12.5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_out = 0, n_busy = 0, n_match = 0;
  int m_random = 0, m_sa_veto = 0, m_inhibit = 0, m_short = 0, m_long = 0, m_roll = 0;
  int m_lea = 0, m_clear = 0, m_rod_veto = 0, m_rod_blank = 0, m_regs = 0;
  logic prev_mc_roll;

  always @(negedge clk) if (rst_n) begin
    if (trigger_out) n_out++;
    if (rod_busy_out) n_busy++;
    if (tim_period_match) n_match++;
    if (dut.u_tim.u_core.rollover) m_roll++;
    if (dut.u_tim.u_sa.inhibited) m_inhibit++;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  task automatic rd(logic [7:0] a, output logic [15:0] d);
    @(negedge clk); reg_addr = a; #1 d = reg_rdata;
  endtask

  task automatic wrt(logic [7:0] a, logic [15:0] d);
    @(negedge clk); reg_addr = a; reg_wdata = d; reg_wr = 1; @(negedge clk); reg_wr = 0;
  endtask

  task automatic nim_pulse();
    @(negedge clk); nim_in = 1; repeat (2) @(negedge clk); nim_in = 0;
  endtask

  task automatic ttc_pulse();
    @(negedge clk); ttc_trig = 1; @(negedge clk); ttc_trig = 0;
  endtask

  task automatic rod_cmd();
    bit bits[4] = '{0, 1, 1, 0};
    foreach (bits[i]) begin @(negedge clk); rod_ser_in = bits[i]; end
    @(negedge clk); rod_ser_in = 0;
  endtask

  logic [15:0] d, d1;
  int out0, busy0, num0, ones;

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;

    // ---- random: internal generator, bunch spacing 22 then 1 ----
    int_enable = 1; bunch_spacing = 8'd22; freq_setting = 5'd19;   // ~2.5 MHz / 22
    repeat (20000) @(negedge clk);
    bunch_spacing = 8'd1; freq_setting = 5'd14;                     // ~80 kHz
    repeat (100000) @(negedge clk);
    int_enable = 0;
    repeat (4000) @(negedge clk);
    m_random = n_out;
    check(n_out > 100 && int'(sa_trig_num) == n_out - 1 - m_inhibit, "random triggers numbered");
    // match-level 10 over this short random run: veto practically impossible
    check(!tim_veto, "no veto from a short random run");

    // ---- sa_veto: fixed 20 kHz NIM triggers ----
    wrt(A_CONTROL, 16'h0006);                       // clear counters
    repeat (3000) @(negedge clk);
    nim_pulse();
    // also a short double trigger after each one: skipped by the lower limit
    for (int i = 0; i < 11; i++) begin
      repeat (30) @(negedge clk); nim_pulse(); m_short++;
      repeat (2000 - 36) @(negedge clk); nim_pulse();
    end
    repeat (2) @(negedge clk);
    check(tim_veto && rod_busy_out, "stand-alone veto after 11 periods");
    if (tim_veto) m_sa_veto++;
    out0 = n_out; busy0 = n_busy;
    for (int i = 0; i < 5; i++) begin repeat (2000 - 3) @(negedge clk); nim_pulse(); end
    check(n_out == out0 && !tim_lea_active, "NIM triggers inhibited, no emergency");
    while (tim_veto) @(negedge clk);
    check(n_busy - busy0 + 2 >= 40000 - 2 && n_busy - busy0 <= 40000, "busy for the veto");
    rd(A_FFTV_CNT0, d); rd(A_FFTV_CNT1, d1);
    check({d1, d} == 32'd40000, "FFTV busy count 40000 read back");
    rd(A_VETO_ID0, d); check(d == 1, "one veto read back");
    if ({d1, d} != 0) m_regs++;

    // ---- long periods: 10 kHz passes untouched ----
    out0 = n_out;
    for (int i = 0; i < 12; i++) begin repeat (4000 - 3) @(negedge clk); nim_pulse(); m_long++; end
    repeat (4) @(negedge clk);
    check(!tim_veto && n_out == out0 + 12 && tim_match_count == 0, "10 kHz triggers pass");

    // ---- lea: TTC fixed frequency continues through the veto ----
    repeat (3000) @(negedge clk);
    ttc_pulse();
    for (int i = 0; i < 11; i++) begin repeat (2000 - 2) @(negedge clk); ttc_pulse(); end
    @(negedge clk); check(tim_veto, "run-mode veto");
    out0 = n_out;
    repeat (2000 - 3) @(negedge clk); ttc_pulse(); @(negedge clk);
    check(tim_lea_active && !tim_ok && n_out == out0, "Local Emergency Action");
    if (tim_lea_active) m_lea++;
    while (tim_veto) @(negedge clk);
    repeat (50) @(negedge clk);
    check(rod_busy_out, "busy held by the emergency");
    wrt(A_CONTROL, 16'h0001); repeat (2) @(negedge clk);
    check(!tim_lea_active && tim_ok && !rod_busy_out, "Clear-LEA");
    if (!tim_lea_active) m_clear++;

    // ---- rollover: silence empties the match counter; 4 matches, then silence ----
    repeat (70000) @(negedge clk);
    check(tim_match_count == 0, "roll-overs emptied the match counter");
    ttc_pulse();
    for (int i = 0; i < 5; i++) begin repeat (2000 - 2) @(negedge clk); ttc_pulse(); end
    @(negedge clk); check(tim_match_count == 4, "4 matches");
    repeat (4200) @(negedge clk);
    check(tim_match_count == 3, "roll-over decrement");

    // ---- rod: serial commands at 20 kHz ----
    busy0 = n_busy;
    repeat (3000) @(negedge clk); rod_cmd();
    for (int i = 0; i < 11; i++) begin repeat (2000 - 5) @(negedge clk); rod_cmd(); end
    repeat (3) @(negedge clk);
    check(rod_veto && rod_busy_out && !tim_veto, "ROD veto reaches the CTP busy");
    if (rod_veto) m_rod_veto++;
    repeat (2000 - 8) @(negedge clk);
    rod_cmd();
    ones = 0;
    repeat (12) begin @(negedge clk); if (rod_ser_out) ones++; end
    check(ones == 0 && rod_emergency_active, "late ROD command removed, ROD emergency");
    if (ones == 0 && rod_emergency_active) m_rod_blank++;
    rd(A_RODBUSY_STATUS, d); check(d[0], "ROD0-Busy seen by the TIM");
    while (rod_veto) @(negedge clk);
    rod_emergency_clear = 1; repeat (3) @(negedge clk); rod_emergency_clear = 0;
    repeat (3) @(negedge clk);
    check(!rod_busy_out && rod_veto_id == 1, "ROD released");

    check(m_random > 0, "mechanism: random generator");
    check(m_sa_veto > 0 && m_inhibit > 0, "mechanism: stand-alone veto and inhibit");
    check(m_short > 0 && m_long > 0 && m_roll > 0, "mechanism: limits and roll-over");
    check(m_lea > 0 && m_clear > 0, "mechanism: emergency and clear");
    check(m_rod_veto > 0 && m_rod_blank > 0 && m_regs > 0, "mechanism: ROD veto, blanking, regs");
    check(n_match > 30, "period matches");
    $display("random %0d sa_veto %0d inhibit %0d short %0d long %0d roll %0d lea %0d clear %0d rod_veto %0d rod_blank %0d regs %0d matches %0d",
             m_random, m_sa_veto, m_inhibit, m_short, m_long, m_roll, m_lea, m_clear,
             m_rod_veto, m_rod_blank, m_regs, n_match);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(25 * 1_000_000);
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
