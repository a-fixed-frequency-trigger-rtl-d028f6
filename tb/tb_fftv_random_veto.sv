// tb_fftv_random_veto: veto probability of the TIM for pseudo-random triggers.
//
// Workload: the TIM vetoes its own internal random triggers (stand-alone mode) at the final
// settings, with the randomiser at setting 14 (about 78 kHz, bunch spacing 1), and the
// fraction of triggers that generate a veto is measured for match-levels 2 and 3. Measurements
// with the same randomiser on the hardware gave about 2.7e-3 (level 2) and 3e-4 (level 3); the
// testbench accepts a factor of about 3 either way and checks that level 3 is rarer than
// level 2. Triggers arriving during a veto are inhibited and are counted as received, as in the
// measurement. The LFSR is deterministic, so the result is reproducible.
module tb_fftv_random_veto;
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

  tim_fftv dut (.*);

  always #12.5 clk = ~clk;

  int checks = 0, failures = 0;
  longint n_trig = 0, n_veto = 0;

  always @(negedge clk) if (rst_n) begin
    if (dut.int_trig) n_trig++;
    if (dut.veto_start) n_veto++;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wrt(logic [7:0] a, logic [15:0] d);
    @(negedge clk); reg_addr = a; reg_wdata = d; reg_wr = 1; @(negedge clk); reg_wr = 0;
  endtask

  real p2, p3;
  longint t0;

  task automatic measure(int level, longint triggers, output real p);
    wrt(A_FFTV_CONFIG, 16'(level));
    n_trig = 0; n_veto = 0; t0 = $time;
    int_enable = 1;
    while (n_trig < triggers) @(negedge clk);
    int_enable = 0;
    p = real'(n_veto) / real'(n_trig);
    $display("match-level %0d: %0d triggers, %0d vetoes, probability %e, rate %0d kHz", level,
             n_trig, n_veto, p, n_trig * 40000 / (($time - t0) / 25));
    while (veto) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    measure(2, 40000, p2);
    check(p2 > 9e-4 && p2 < 8e-3, "level 2 probability near 2.7e-3");
    measure(3, 150000, p3);
    check(p3 > 1e-4 && p3 < 1e-3, "level 3 probability near 3e-4");
    check(p3 < p2, "higher match-level vetoes less often");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(25.0 * 200_000_000);
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
