// tb_tim_standalone: self-checking testbench of the TIM stand-alone trigger sources.
//
// Checks that a front-panel NIM or ECL edge gives exactly one sa_trig two clocks later (a
// held level gives no second trigger), that the internal generator at setting 23 (every clock)
// gives a trigger each clock, that inhibit (the veto) suppresses every source and reports it on
// inhibited, and that triggers are numbered consecutively with numbers that do not advance
// while inhibited.
module tb_tim_standalone;
  logic clk = 0, rst_n = 0, nim_in = 0, ecl_in = 0, int_enable = 0, inhibit = 0, ecr = 0;
  logic [4:0] freq_setting = 5'd23;
  logic [7:0] bunch_spacing = 8'd1;
  logic sa_trig, inhibited, sa_num_valid, int_trig;
  logic [23:0] sa_trig_num;
  int checks = 0, failures = 0, n_sa = 0, n_inh = 0, n_num = 0, last_num = -1;

  tim_standalone dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s at %0t", what, $time); end
  endtask

  always @(negedge clk) if (rst_n) begin
    if (sa_trig)   n_sa++;
    if (inhibited) n_inh++;
    if (sa_num_valid) begin
      checks++;
      if (int'(sa_trig_num) != last_num + 1) begin
        failures++; $display("FAIL: number %0d after %0d", sa_trig_num, last_num);
      end
      last_num = int'(sa_trig_num); n_num++;
    end
  end

  task automatic edge_test(bit use_nim, bit inh);
    int first = -1, cnt = 0;
    inhibit = inh;
    @(negedge clk); if (use_nim) nim_in = 1; else ecl_in = 1;
    for (int i = 1; i <= 10; i++) begin
      @(negedge clk);
      if (sa_trig || inhibited) begin cnt++; if (first < 0) first = i; end
      if (i != 2) check(!sa_trig && !inhibited, "no trigger except clock 2");
    end
    check(cnt == 1 && first == 2, "one trigger two clocks after the edge");
    nim_in = 0; ecl_in = 0; repeat (4) @(negedge clk);
    inhibit = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    edge_test(1, 0); edge_test(0, 0);
    check(n_sa == 2 && n_inh == 0, "two front-panel triggers");
    edge_test(1, 1); edge_test(0, 1);
    check(n_sa == 2 && n_inh == 2, "front-panel triggers inhibited");
    // internal generator, every clock
    int_enable = 1; repeat (2) @(negedge clk);
    repeat (50) begin @(negedge clk); check(sa_trig && int_trig, "internal trigger every clock"); end
    inhibit = 1;
    repeat (50) begin @(negedge clk); check(!sa_trig && inhibited, "internal trigger inhibited"); end
    int_enable = 0; inhibit = 0; repeat (5) @(negedge clk);
    check(n_num == n_sa && n_sa >= 52, "every passed trigger numbered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
