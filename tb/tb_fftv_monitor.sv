// tb_fftv_monitor: self-checking testbench of the busy timers and veto counters.
//
// Drives random busy / FFTV-busy levels and veto / trigger pulses and keeps its own counts,
// compared with the block's outputs every cycle. Small widths (8, 6, 4, 3 bits) make every
// counter wrap so the latching roll-over flags are checked; the clears are checked as well.
// A second instance with widths 0/24/8/0 (the ROD variant) checks that absent counters read 0.
module tb_fftv_monitor;
  logic clk = 0, rst_n = 0;
  logic busy = 0, fftv_busy = 0, veto_start = 0, veto_trig = 0, count_clear = 0, id_clear = 0;
  logic [7:0] busy_time; logic [5:0] veto_busy_time; logic [3:0] veto_id; logic [2:0] veto_trigs;
  logic busy_time_roll, veto_busy_time_roll, veto_id_roll, veto_trigs_roll;
  logic [0:0] r_busy; logic [23:0] r_vbusy; logic [7:0] r_id; logic [0:0] r_vt;
  logic r_br, r_vbr, r_ir, r_vtr;

  int checks = 0, failures = 0;
  int e_b = 0, e_vb = 0, e_id = 0, e_vt = 0, e_rid = 0;
  bit e_br = 0, e_vbr = 0, e_ir = 0, e_vtr = 0;
  int rolls = 0;

  fftv_monitor #(.BUSY_W(8), .VETO_BUSY_W(6), .ID_W(4), .VTRIG_W(3)) dut (.*);

  fftv_monitor #(.BUSY_W(0), .VETO_BUSY_W(24), .ID_W(8), .VTRIG_W(0)) rod (
    .clk, .rst_n, .busy, .fftv_busy, .veto_start, .veto_trig, .count_clear, .id_clear,
    .busy_time(r_busy), .veto_busy_time(r_vbusy), .veto_id(r_id), .veto_trigs(r_vt),
    .busy_time_roll(r_br), .veto_busy_time_roll(r_vbr), .veto_id_roll(r_ir),
    .veto_trigs_roll(r_vtr));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  // reference update at each rising edge, using the inputs sampled there
  always @(posedge clk) if (rst_n) begin
    if (count_clear) begin e_b = 0; e_vb = 0; e_br = 0; e_vbr = 0; end
    else begin
      if (busy)      begin if (e_b == 255) e_br = 1;  e_b  = (e_b + 1) % 256; end
      if (fftv_busy) begin if (e_vb == 63) e_vbr = 1; e_vb = (e_vb + 1) % 64; end
    end
    if (id_clear) begin e_id = 0; e_vt = 0; e_ir = 0; e_vtr = 0; e_rid = 0; end
    else begin
      if (veto_start) begin if (e_id == 15) e_ir = 1; e_id = (e_id + 1) % 16; e_rid++; end
      if (veto_trig)  begin if (e_vt == 7) e_vtr = 1; e_vt = (e_vt + 1) % 8; end
    end
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(busy_time == 8'(e_b) && veto_busy_time == 6'(e_vb) && veto_id == 4'(e_id) &&
            veto_trigs == 3'(e_vt), "counts");
      check(busy_time_roll == e_br && veto_busy_time_roll == e_vbr && veto_id_roll == e_ir &&
            veto_trigs_roll == e_vtr, "roll-over flags");
      check(r_busy == 0 && r_vt == 0 && !r_br && !r_vtr && r_id == 8'(e_rid) &&
            !r_ir, "ROD variant");
      if (e_br && e_vbr && e_ir && e_vtr) rolls++;
      busy        = ($urandom % 4) != 0;
      fftv_busy   = ($urandom % 3) == 0;
      veto_start  = ($urandom % 20) == 0;
      veto_trig   = ($urandom % 10) == 0;
      count_clear = (i % 1000) == 999;
      id_clear    = (i % 1500) == 1499;
    end
    check(rolls > 0, "all roll-over flags were set at least once");
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
