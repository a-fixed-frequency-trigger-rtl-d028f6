// tb_rod_fftv: self-checking testbench of the read-out-driver veto on a serial command line.
//
// Serial "0110" trigger commands are sent every 2000 clocks (20 kHz). The testbench keeps its
// own copy of the expected output line (input delayed by 6 clocks, with a command's two '1' bits
// removed when it must be stopped) and compares it every clock. Checked: match-level 3 vetoes
// on the 4th periodic command after a reference command; commands within 80 clocks of the veto pass; the next one is removed and
// starts the emergency; emergency_clear is ignored during the veto and while held high also
// stops commands; after it is written back to 0 commands pass again. Counters: one veto, busy
// time = veto + emergency clocks, latched busy/emergency bits, clears; commands sent while count_clear or id_clear is held are removed too. The Pixel line disables
// everything. A second instance with an 1-bit ID counter checks the ID roll-over bit.
module tb_rod_fftv;
  logic clk = 0, rst_n = 0, ser_in = 0, fftv_disable = 0;
  logic [3:0] match_level = 4'd3;
  logic emergency_clear = 0, count_clear = 0, id_clear = 0;
  logic ser_out;
  logic [23:0] busy_time; logic [7:0] veto_id;
  logic busy_time_roll, veto_id_roll, busy_active, busy_active_latch;
  logic emergency_active, emergency_latch, rod_busy, trig_detected, veto;
  logic s_ser_out, s_btr, s_idr, s_ba, s_bal, s_ea, s_el, s_rb, s_td, s_veto;
  logic [23:0] s_bt; logic [0:0] s_id;

  int checks = 0, failures = 0, busy_cycles = 0, line_err = 0;
  bit exp_line[$];
  bit stop_next = 0;

  rod_fftv dut (.*);

  rod_fftv #(.ID_CNT_W(1)) u_small (
    .clk, .rst_n, .ser_in, .ser_out(s_ser_out), .fftv_disable, .match_level, .emergency_clear,
    .count_clear, .id_clear, .busy_time(s_bt), .veto_id(s_id), .busy_time_roll(s_btr),
    .veto_id_roll(s_idr), .busy_active(s_ba), .busy_active_latch(s_bal),
    .emergency_active(s_ea), .emergency_latch(s_el), .rod_busy(s_rb),
    .trig_detected(s_td), .veto(s_veto));

  always #12.5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  // expected line: what was sent 6 clocks ago, unless blanked
  bit sent[$];
  // Checked 1 time unit after the falling edge, once the stimulus of that edge is queued: the
  // newest entry is not yet sampled, the one 7 back has just reached the output.
  always @(negedge clk) if (rst_n) begin
    #1;
    if (sent.size() >= 7) begin
      checks++;
      if (ser_out != sent[sent.size() - 7]) begin
        failures++; line_err++;
        if (line_err < 5) $display("FAIL: output line at %0t", $time);
      end
    end
    if (busy_active) busy_cycles++;
  end

  // send one command; blank=1 means the testbench expects it to be removed
  task automatic send_cmd(bit blank);
    bit bits[4] = '{0, 1, 1, 0};
    foreach (bits[i]) begin
      @(negedge clk); ser_in = bits[i];
      sent.push_back((blank && (i == 1 || i == 2)) ? 1'b0 : bits[i]);
    end
    @(negedge clk); ser_in = 0; sent.push_back(0);
  endtask

  task automatic idle(int n);
    repeat (n) begin @(negedge clk); ser_in = 0; sent.push_back(0); end
  endtask

  int bc;
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    idle(3000);
    send_cmd(0);                                   // reference (long period)
    for (int i = 0; i < 4; i++) begin idle(1995); send_cmd(0); end
    idle(3);
    check(veto && rod_busy && veto_id == 1, "veto on the 4th command after the reference");
    idle(1992);
    send_cmd(1);                                   // 2000 clocks after the veto: removed
    idle(3);
    check(emergency_active && emergency_latch, "emergency after a late command");
    emergency_clear = 1; idle(5); emergency_clear = 0;
    check(emergency_active, "emergency_clear ignored during veto");
    while (veto) idle(1);
    idle(10);
    check(emergency_active && rod_busy, "emergency keeps busy after veto");
    emergency_clear = 1; idle(5);
    check(!emergency_active && !emergency_latch, "emergency cleared");
    send_cmd(1);                                   // removed while clear is held
    idle(3);
    emergency_clear = 0;
    idle(10);
    send_cmd(0);                                   // passes again
    check(s_id == 1'b1 && !s_idr, "small ID counter after one veto");
    // a second fixed-frequency burst: second veto, the 1-bit ID counter rolls over
    idle(3000); send_cmd(0);
    for (int i = 0; i < 4; i++) begin idle(1995); send_cmd(0); end
    idle(3);
    check(veto && veto_id == 2, "second veto");
    while (veto) idle(1);
    idle(10);
    bc = busy_cycles;
    check(busy_time == 24'(bc) && !busy_time_roll, "busy time counter");
    check(busy_active_latch, "busy latch");
    check(s_idr && s_id == 1'b0, "small ID counter rolled over (2 vetoes)");
    count_clear = 1; id_clear = 1; idle(1); count_clear = 0; id_clear = 0; idle(1);
    check(busy_time == 0 && veto_id == 0 && !busy_active_latch && !s_idr, "clears");
    count_clear = 1; idle(2); send_cmd(1); idle(3); count_clear = 0;   // held back
    id_clear = 1; idle(2); send_cmd(1); idle(3); id_clear = 0;         // held back
    idle(10); send_cmd(0);                                             // passes again
    // Pixel ROD: disabled
    fftv_disable = 1;
    idle(3000); send_cmd(0);
    for (int i = 0; i < 6; i++) begin idle(1995); send_cmd(0); end
    idle(2);
    check(!veto && !rod_busy, "Pixel ROD: no veto");
    idle(10);
    check(line_err == 0, "output line matched throughout");
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
