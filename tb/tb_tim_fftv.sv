// tb_tim_fftv: self-checking testbench of the TIM trigger path with the veto, at the final
// settings (85..2666 clocks, tolerance 40, match-level 10, veto 40000 clocks, LEA after 80).
//
// Stand-alone mode: a 20 kHz front-panel NIM trigger is vetoed after 11 triggers; during the
// veto stand-alone triggers are inhibited at the source (none reach trigger_out, no emergency),
// the CTP busy is high for exactly the veto and the registers report one veto, 40000 FFTV busy
// clocks and the inhibited triggers. Run mode: a 20 kHz TTC trigger is vetoed; the TTC trigger
// arriving 2000 clocks later (after the 80-clock grace) starts the Local Emergency Action:
// triggers stop, tim_ok drops, busy stays on after the veto; Clear-LEA during the veto is
// ignored, after it releases the emergency. The veto disable needs jumper AND register bit.
// ROD busy inputs reach the CTP busy. Trigger numbering stays consecutive.
module tb_tim_fftv;
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
  logic veto, lea_active, period_match;
  logic [3:0] match_count;
  logic [12:0] period_count;

  int checks = 0, failures = 0;
  int n_out = 0, busy_cycles = 0;

  tim_fftv dut (.*);

  always #12.5 clk = ~clk;

  always @(negedge clk) begin
    if (trigger_out) n_out++;
    if (rod_busy_out) busy_cycles++;
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

  logic [15:0] d, d1, d2;
  int out0, bc0, t0;

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;

    // ---- stand-alone: fixed 20 kHz NIM triggers (period 2000 clocks = 2 x 1000) ----
    repeat (3000) @(negedge clk);
    nim_pulse();                                        // reference trigger (long period)
    for (int i = 0; i < 10; i++) begin repeat (2000 - 3) @(negedge clk); nim_pulse(); end
    @(negedge clk); check(!veto && match_count == 9, "no veto after 10 periods, 9 matches");
    repeat (2000 - 4) @(negedge clk); nim_pulse();
    repeat (2) @(negedge clk); check(veto && rod_busy_out, "veto and busy after 11th trigger");
    out0 = n_out; bc0 = busy_cycles;
    // keep sending NIM triggers during the veto: all inhibited, no emergency
    for (int i = 0; i < 15; i++) begin repeat (2000 - 3) @(negedge clk); nim_pulse(); end
    check(n_out == out0 && !lea_active, "stand-alone triggers inhibited during veto");
    while (veto) @(negedge clk);
    check(busy_cycles == 40000, "busy lasts for the veto (40000 clocks)");
    check(!rod_busy_out && tim_ok, "busy released, TIM OK");
    rd(A_VETO_ID0, d); check(d == 16'd1, "one veto counted");
    rd(A_FFTV_CNT0, d); rd(A_FFTV_CNT1, d1);
    check({d1, d} == 32'd40000, "FFTV busy count = 40000");
    rd(A_VETO_TRIG0, d); check(d == 16'd15, "15 inhibited triggers counted");
    rd(A_BUSY_STATUS3_L, d); check(d[BS3_VETO] && d[BS3_RODBUSY] && !d[BS3_LEA], "latched status");
    check(sa_trig_num == 24'd11, "11 stand-alone triggers numbered");

    // ---- run mode: TTC triggers at 20 kHz continue through the veto ----
    wrt(A_FFTV_CONFIG, 16'h0002);                       // match-level 2
    repeat (5000) @(negedge clk);
    ttc_pulse();                                        // reference
    for (int i = 0; i < 3; i++) begin repeat (2000 - 2) @(negedge clk); ttc_pulse(); end
    @(negedge clk); check(veto, "run-mode veto at level 2 after 3 periods");
    out0 = n_out;
    repeat (2000 - 3) @(negedge clk);
    ttc_pulse();                                        // arrives 2000 clocks after the veto
    @(negedge clk);
    check(n_out == out0 && lea_active && !tim_ok, "late TTC trigger blocked, emergency");
    rd(A_BUSY_STATUS3, d); check(d[BS3_LEA] && d[BS3_VETO], "status shows LEA and veto");
    wrt(A_CONTROL, 16'h0001);                           // Clear-LEA during veto: ignored
    repeat (2) @(negedge clk); check(lea_active, "Clear-LEA ignored during veto");
    while (veto) @(negedge clk);
    repeat (100) @(negedge clk);
    check(rod_busy_out && lea_active, "busy stays on after the veto");
    ttc_pulse(); @(negedge clk); check(n_out == out0, "triggers still stopped");
    wrt(A_CONTROL, 16'h0001);
    repeat (2) @(negedge clk);
    check(!lea_active && tim_ok && !rod_busy_out, "Clear-LEA after the veto releases");
    out0 = n_out; ttc_pulse(); @(negedge clk); check(n_out == out0 + 1, "triggers flow again");
    check(ttc_trig_num == 24'd6, "TTC triggers numbered, blocked ones included");

    // ---- disable needs jumper AND bit ----
    wrt(A_FFTV_CONFIG, 16'h0012);                       // level 2, disable bit, no jumper
    repeat (5000) @(negedge clk); ttc_pulse();
    for (int i = 0; i < 3; i++) begin repeat (2000 - 2) @(negedge clk); ttc_pulse(); end
    @(negedge clk); check(veto, "bit alone does not disable");
    while (veto) @(negedge clk);
    fftv_jumper = 1;
    repeat (5000) @(negedge clk); ttc_pulse();
    for (int i = 0; i < 6; i++) begin repeat (2000 - 2) @(negedge clk); ttc_pulse(); end
    @(negedge clk); check(!veto && match_count == 0, "jumper and bit disable the veto");
    fftv_jumper = 0;

    // ---- ROD busy inputs reach the CTP busy ----
    rod_busy_in = 16'h0400; @(negedge clk); check(rod_busy_out, "ROD busy OR");
    rod_busy_in = 0;        @(negedge clk); check(!rod_busy_out, "busy released");
    rd(A_RODBUSY_LATCH, d); check(d == 16'h0400, "ROD busy latched");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(25 * 400_000);
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
