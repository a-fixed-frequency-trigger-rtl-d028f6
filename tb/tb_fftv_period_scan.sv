// tb_fftv_period_scan: fixed-frequency trigger period scan through the TIM in stand-alone mode
// at the final settings (match-level 10).
//
// Workload: a front-panel trigger of fixed period P (in 25 ns clocks) is applied for several
// vetoes and the number of triggers that reach trigger_out per veto is measured. The hardware
// scan gave about 12 triggers per veto inside the window, about 23 for P = 80..85 (every other
// trigger is too close and two periods merge), about 34 at P = 30-40 (three merge) and no
// veto above the upper limit. Checked here: P = 40 -> 28..40, P = 85 -> 18..28,
// P = 86, 1000, 2667 -> 9..15, P = 2668 and 4000 -> no veto.
module tb_fftv_period_scan;
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

  tim_fftv dut (.*);

  always #12.5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_out = 0, n_veto = 0;
  always @(negedge clk) if (rst_n) begin
    if (trigger_out) n_out++;
    if (dut.veto_start) n_veto++;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Apply period p until `vetoes` vetoes after the first one (or `max_trig` triggers);
  // returns triggers out per veto (0 if no veto).
  task automatic scan(int p, int vetoes, int max_trig, output real ratio);
    int out0, v0, sent;
    // settle: no triggers for a while so the match counter empties
    repeat (50000) @(negedge clk);
    v0 = n_veto; sent = 0;
    while (n_veto == v0 && sent < max_trig) begin
      nim_in = 1; @(negedge clk); nim_in = 0; repeat (p - 1) @(negedge clk); sent++;
    end
    out0 = n_out; v0 = n_veto;
    while (n_veto - v0 < vetoes && sent < max_trig) begin
      nim_in = 1; @(negedge clk); nim_in = 0; repeat (p - 1) @(negedge clk); sent++;
    end
    ratio = (n_veto > v0) ? real'(n_out - out0) / real'(n_veto - v0) : 0.0;
    $display("period %4d clocks: %0d vetoes, %.1f triggers per veto", p, n_veto - v0, ratio);
  endtask

  real r;
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    scan(40,   4, 400000, r); check(r >= 28 && r <= 40, "P=40: three periods merge");
    scan(85,   4, 400000, r); check(r >= 18 && r <= 28, "P=85: still too short, two merge");
    scan(86,   4, 400000, r); check(r >= 9 && r <= 15, "P=86: inside the window");
    scan(1000, 4, 400000, r); check(r >= 9 && r <= 15, "P=1000: inside the window");
    scan(2667, 4, 400000, r); check(r >= 9 && r <= 15, "P=2667: inside the window");
    scan(2668, 4, 200,    r); check(r == 0, "P=2668: above the upper limit, no veto");
    scan(4000, 4, 200,    r); check(r == 0, "P=4000: no veto");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(25.0 * 100_000_000);
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
