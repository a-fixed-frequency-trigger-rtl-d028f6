// tb_tim_fftv_regs: self-checking testbench of the TIM FFTV register block.
//
// Drives known status and counter values and reads every published address back, checking
// word order and bit positions (Busy Status3 bits 10, 13, 14). Checks the latch registers keep
// short pulses until cleared by writing 1s, the control register produces one-cycle command
// pulses, and the configuration register resets to match-level 10 and reads back what is
// written.
module tb_tim_fftv_regs;
  logic clk = 0, rst_n = 0;
  logic [7:0] addr = 0; logic wr = 0; logic [15:0] wdata = 0, rdata;
  logic [15:0] rod_busy_in = 0;
  logic busy_out = 0, veto = 0, lea_active = 0;
  logic [47:0] busy_time = 48'h1234_5678_9ABC, veto_busy_time = 48'hDEF0_1357_2468;
  logic [31:0] veto_id = 32'hCAFE_0042, veto_trigs = 32'h0007_0003;
  logic clear_lea, count_clear, id_clear, sw_disable;
  logic [3:0] match_level;
  int checks = 0, failures = 0;

  tim_fftv_regs dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t (rdata %h)", what, $time, rdata); end
  endtask

  task automatic rd(logic [7:0] a, logic [15:0] exp, string what);
    @(negedge clk); addr = a; #1; check(rdata == exp, what);
  endtask

  task automatic wrt(logic [7:0] a, logic [15:0] d);
    @(negedge clk); addr = a; wdata = d; wr = 1; @(negedge clk); wr = 0;
  endtask

  int pulses;
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    rd(8'h48, 16'h000A, "config resets to level 10");
    rd(8'h60, 16'h9ABC, "busy count word 0"); rd(8'h62, 16'h5678, "busy count word 1");
    rd(8'h64, 16'h1234, "busy count word 2");
    rd(8'h74, 16'h2468, "FFTV count word 0"); rd(8'h76, 16'h1357, "FFTV count word 1");
    rd(8'h78, 16'hDEF0, "FFTV count word 2");
    rd(8'h84, 16'h0042, "veto ID low"); rd(8'h86, 16'hCAFE, "veto ID high");
    rd(8'h88, 16'h0003, "vetoed triggers low"); rd(8'h8A, 16'h0007, "vetoed triggers high");
    rd(8'h30, 16'h0000, "unused address");
    // live and latched status
    @(negedge clk); busy_out = 1; veto = 1; rod_busy_in = 16'h8001;
    rd(8'h5A, 16'h4400, "Busy Status3 busy+veto");
    rd(8'h20, 16'h8001, "RODBusy status");
    @(negedge clk); busy_out = 0; veto = 0; lea_active = 1; rod_busy_in = 16'h0010;
    rd(8'h5A, 16'h2000, "Busy Status3 LEA");
    @(negedge clk); lea_active = 0; rod_busy_in = 0;
    rd(8'h5E, 16'h6400, "Busy Status3 latch holds all three");
    rd(8'h22, 16'h8011, "RODBusy latch holds pulses");
    wrt(8'h5E, 16'h0400);
    rd(8'h5E, 16'h6000, "latch bit 10 cleared by writing 1");
    wrt(8'h22, 16'hFFFF);
    rd(8'h22, 16'h0000, "RODBusy latch cleared");
    // config
    wrt(8'h48, 16'h0013);
    rd(8'h48, 16'h0013, "config readback");
    check(match_level == 4'd3 && sw_disable, "config outputs");
    // control pulses
    pulses = 0;
    fork
      begin wrt(8'h46, 16'h0007); end
      repeat (6) begin @(posedge clk); #1; if (clear_lea && count_clear && id_clear) pulses++; end
    join
    check(pulses == 1, "control write gives one-cycle pulses");
    rd(8'h46, 16'h0000, "control reads 0");
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
