// tb_trigger_number_gen: self-checking testbench of the trigger number generator.
//
// Random trigger pulses and occasional event-counter resets; the testbench keeps its own count
// and checks that every trigger comes out one clock later with the expected number, that
// numbers are consecutive and that the reset restarts them at zero.
module tb_trigger_number_gen;
  logic clk = 0, rst_n = 0, ecr = 0, trig = 0;
  logic trig_out;
  logic [23:0] trig_num_out, next_num;
  int checks = 0, failures = 0, expect_num = 0, resets = 0;
  bit   pend = 0;
  int   pend_num;

  trigger_number_gen dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      check(trig_out == pend, "trigger delayed by one clock");
      if (pend) check(trig_num_out == 24'(pend_num), "trigger number");
      check(next_num == 24'(expect_num), "next number");
      ecr  = ($urandom % 700) == 0;
      trig = ($urandom % 3) == 0;
      pend = trig && !ecr;
      pend_num = expect_num;
      if (ecr) begin expect_num = 0; resets++; end
      else if (trig) expect_num++;
    end
    check(resets > 0, "event-counter reset exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
