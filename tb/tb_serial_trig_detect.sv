// tb_serial_trig_detect: self-checking testbench of the serial trigger command detector.
//
// Sends a random bit stream with embedded "0110" commands (including back-to-back "0110110")
// and checks, from the testbench's own history of sent bits, that trig pulses exactly two
// clocks after the last bit of every "0110" and at no other time.
module tb_serial_trig_detect;
  logic clk = 0, rst_n = 0, ser_in = 0, trig;
  int checks = 0, failures = 0, found = 0;
  logic [7:0] hist = 0;   // hist[0] = bit sent in the previous cycle

  serial_trig_detect dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s at %0t", what, $time); end
  endtask

  bit q[$];
  task automatic push_bits(logic [6:0] bits, int n);
    for (int j = n - 1; j >= 0; j--) q.push_back(bits[j]);
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      int k;
      k = $urandom % 4;
      if (k == 0)      push_bits(4'b0110, 4);
      else if (k == 1) push_bits(7'b0110110, 7);
      else             push_bits(1'($urandom), 1);
    end
    while (q.size() > 0) begin
      @(negedge clk);
      // trig now reflects the 4 bits that ended two clocks ago
      check(trig == (hist[4:1] == 4'b0110), "trig matches history");
      if (trig) found++;
      ser_in = q.pop_front();
      hist = {hist[6:0], ser_in};
    end
    check(found > 300, "many commands found");
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
