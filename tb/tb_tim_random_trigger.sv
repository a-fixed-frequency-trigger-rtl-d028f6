// tb_tim_random_trigger: self-checking testbench of the TIM pseudo-random trigger generator.
//
// An independent model keeps the shift register as a 7-bit high word and a 32-bit low word
// (feedback = NOT(high bit 6 XOR high bit 2), shifted in at the bottom of the low word) and is
// compared with the generator's state every clock. The trigger output is checked against the
// model state and the mask of each setting one clock later. Rates are checked: setting 23 fires
// every clock, setting 22 about every 2nd clock, setting 14 (about 80 kHz) within 25% of
// 40 MHz / 2^9, and with bunch spacing 22 triggers only come every 22nd clock.
module tb_tim_random_trigger;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [4:0] freq_setting = 5'd23;
  logic [7:0] bunch_spacing = 8'd1;
  logic trig;
  logic [38:0] lfsr_state;

  int checks = 0, failures = 0;
  logic [6:0]  mh;
  logic [31:0] ml;
  bit exp_trig;

  tim_random_trigger dut (.*);

  always #12.5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s at %0t", what, $time); end
  endtask

  function automatic logic [38:0] tb_mask(int s);
    logic [6:0] h; logic [31:0] l;
    case (s)
      14: begin h = 7'h41; l = 32'h04124105; end
      18: begin h = 7'h04; l = 32'h08081010; end
      22: begin h = 7'h00; l = 32'h00080000; end
      default: begin h = 0; l = 0; end
    endcase
    return {h, l};
  endfunction

  // model: step on every clock edge out of reset
  always @(posedge clk) begin
    if (!rst_n) begin mh <= 0; ml <= 0; exp_trig <= 0; end
    else begin
      exp_trig <= enable && ((({mh, ml}) & tb_mask(freq_setting)) == tb_mask(freq_setting));
      mh <= {mh[5:0], ml[31]};
      ml <= {ml[30:0], ~(mh[6] ^ mh[2])};
    end
  end

  int n_trig, n_off_phase;
  int phase;

  task automatic run_rate(int setting, int spacing, int cycles, output int count);
    freq_setting = 5'(setting); bunch_spacing = 8'(spacing);
    repeat (300) @(posedge clk);
    count = 0;
    repeat (cycles) begin
      @(negedge clk);
      check(lfsr_state == {mh, ml}, "LFSR state");
      if (setting inside {14, 18, 22, 23} && spacing <= 1) check(trig == exp_trig, "trigger vs model");
      if (trig) count++;
    end
  endtask

  int c;
  initial begin
    repeat (2) @(posedge clk); rst_n = 1; enable = 1;
    run_rate(23, 1, 1000, c);   check(c == 1000, "setting 23: every clock");
    run_rate(22, 1, 20000, c);  check(c > 9000 && c < 11000, "setting 22: about half");
    run_rate(18, 1, 64000, c);  check(c > 1500 && c < 2500, "setting 18: about 1/32");
    run_rate(14, 1, 512000, c); $display("setting 14: %0d triggers in 512000 clocks", c);
    check(c > 750 && c < 1250, "setting 14: about 80 kHz");
    // bunch spacing 22 with every-clock setting: exactly one trigger per 22 clocks
    run_rate(23, 22, 2200, c);  check(c == 100, "spacing 22 at setting 23: 1 in 22");
    // spacing 22 at setting 22: triggers only on one phase
    freq_setting = 5'd22;
    repeat (100) @(posedge clk);
    phase = -1; n_off_phase = 0;
    for (int i = 0; i < 22000; i++) begin
      @(negedge clk);
      if (trig) begin
        if (phase < 0) phase = i % 22;
        else if (i % 22 != phase) n_off_phase++;
      end
    end
    check(phase >= 0 && n_off_phase == 0, "spacing 22: single phase");
    enable = 0; run_rate(23, 1, 100, c); check(c == 0, "disabled: no trigger");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(25 * 1_000_000);
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
