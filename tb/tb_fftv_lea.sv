// tb_fftv_lea: self-checking testbench of the Local Emergency Action.
//
// Checks, against expectations computed here: triggers pass while no veto is active and during
// the first 80 clocks (2 us) of a veto; the first trigger after that is blocked in the same
// cycle and latches the emergency; later triggers are all blocked, also after the veto ends;
// a clear during the veto is ignored, a clear after it releases the emergency; a veto with no
// late trigger leaves no emergency; enable low clears the emergency.
module tb_fftv_lea;
  logic clk = 0, rst_n = 0, enable = 1, veto = 0, trig_in = 0, clear_lea = 0;
  logic trig_out, ok, blocked, armed, lea_active;
  int checks = 0, failures = 0, blocked_n = 0, lea_n = 0;

  fftv_lea dut (.*);   // LEA_DELAY = 80 (default)

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  // drive a trigger for one cycle and check the combinational gate at mid-cycle
  task automatic trig_expect(bit pass);
    @(negedge clk); trig_in = 1; #1;
    check(trig_out == pass && blocked == !pass, pass ? "trigger passes" : "trigger blocked");
    if (blocked) blocked_n++;
    @(posedge clk); #1 trig_in = 0;
  endtask

  always @(posedge clk) if (lea_active) lea_n++;

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    trig_expect(1);                       // no veto: passes
    // veto: 80 clocks of grace
    @(negedge clk); veto = 1;             // veto high from the next rising edge on
    repeat (40) @(posedge clk);
    trig_expect(1);                       // inside 2 us
    repeat (38) @(posedge clk);
    trig_expect(1);                       // clock 79 of the veto, still inside
    trig_expect(0);                       // clock 80: blocked, emergency starts
    @(negedge clk); check(lea_active, "emergency latched");
    trig_expect(0);
    clear_lea = 1; @(posedge clk); #1 clear_lea = 0;
    @(negedge clk); check(lea_active, "clear ignored during veto");
    veto = 0; repeat (5) @(posedge clk);
    trig_expect(0);                       // still stopped after the veto
    check(!ok && lea_active, "emergency persists after veto");
    @(negedge clk); clear_lea = 1; @(posedge clk); #1 clear_lea = 0;
    @(negedge clk); check(!lea_active, "clear after veto releases");
    trig_expect(1);
    // a veto with no late trigger leaves no emergency
    veto = 1; repeat (200) @(posedge clk); veto = 0;
    @(negedge clk); check(!lea_active, "no trigger, no emergency");
    // enable low clears
    veto = 1; repeat (100) @(posedge clk);
    trig_expect(0);
    @(negedge clk); check(lea_active, "second emergency");
    enable = 0; @(posedge clk); #1;
    check(!lea_active && ok, "disable clears emergency");
    enable = 1; veto = 0;
    check(blocked_n == 4 && lea_n > 0, "blocked triggers counted");
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
