// rod_fftv: fixed-frequency-trigger veto on a read-out driver (ROD).
//
// A ROD can send triggers of its own: its DSPs emit serial trigger commands ("0110") on a
// one-bit command line. The same FFTV algorithm and emergency logic as on the TIM watch those
// commands: serial_trig_detect turns each command into a pulse for fftv_core and fftv_lea. The
// command line is passed through a 6-clock delay; when the emergency logic stops a trigger, the
// two '1' bits of that command are cleared in the delay line so the command never leaves the
// ROD. The veto and the emergency drive the ROD busy. Monitoring is reduced: a 24-bit FFTV busy
// time counter and an 8-bit veto counter, each with a latching roll-over bit; there is no
// overall busy timer.
//
// Configuration (ROD register block bits, inputs here): match_level (4 bits, 2..10 valid,
// others mean 10), emergency_clear, count_clear, id_clear. The clear bits are levels: while one
// is 1 its condition is held cleared, and while any of them is 1 triggers are also held back,
// so software must write 0 afterwards to allow triggers again. fftv_disable (wired to the
// "I am a Pixel ROD" line) switches the whole veto off.
//
// Timing: ser_out is ser_in delayed by 6 clocks; trig_detected pulses one clock after the edge
// that samples a command's last bit and the veto one clock after that. Published: the shared algorithm, serial detection,
// the counter widths (24 and 8 bits) and the configuration/status bit list. Chosen here: the
// delay-line blanking, the meaning of the level clear bits for the latched status bits, and the
// use of count_clear for the busy-active latch.
module rod_fftv
  import fftv_pkg::*;
#(
  parameter int unsigned PERIOD_MIN      = PERIOD_MIN_DEF,
  parameter int unsigned PERIOD_MAX      = PERIOD_MAX_DEF,
  parameter int unsigned PERIOD_ROLLOVER = PERIOD_ROLLOVER_DEF,
  parameter int unsigned MATCH_TOL       = MATCH_TOL_DEF,
  parameter int unsigned VETO_DURATION   = VETO_DURATION_DEF,
  parameter int unsigned LEA_DELAY       = LEA_DELAY_DEF,
  parameter int unsigned BUSY_CNT_W      = 24,
  parameter int unsigned ID_CNT_W        = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ser_in,          // serial trigger commands from the DSPs
  output logic                  ser_out,         // filtered command line
  input  logic                  fftv_disable,    // I-Am-A-Pixel-ROD
  // configuration bits
  input  logic [3:0]            match_level,
  input  logic                  emergency_clear,
  input  logic                  count_clear,
  input  logic                  id_clear,
  // status bits
  output logic [BUSY_CNT_W-1:0] busy_time,
  output logic [ID_CNT_W-1:0]   veto_id,
  output logic                  busy_time_roll,  // latching
  output logic                  veto_id_roll,    // latching
  output logic                  busy_active,
  output logic                  busy_active_latch,
  output logic                  emergency_active,
  output logic                  emergency_latch,
  // busy to the TIM, test points
  output logic                  rod_busy,
  output logic                  trig_detected,
  output logic                  veto
);

  logic       enable, veto_start, period_match, rollover;
  logic       lea_trig_out, lea_ok, lea_blocked, lea_armed;
  logic       stop;
  logic [3:0] match_count;
  logic [$clog2(PERIOD_ROLLOVER + 1)-1:0] period_count;
  logic [5:0] dl;                 // dl[0] newest bit
  logic       none_busy, none_vtrig;
  logic       none_busy_roll, none_vtrig_roll;

  assign enable = !fftv_disable;

  serial_trig_detect u_det (.clk, .rst_n, .ser_in, .trig(trig_detected));

  fftv_core #(
    .PERIOD_MIN(PERIOD_MIN), .PERIOD_MAX(PERIOD_MAX), .PERIOD_ROLLOVER(PERIOD_ROLLOVER),
    .MATCH_TOL(MATCH_TOL), .VETO_DURATION(VETO_DURATION)
  ) u_core (
    .clk, .rst_n, .enable, .trig(trig_detected), .match_level,
    .veto, .veto_start, .period_match, .rollover, .match_count, .period_count);

  fftv_lea #(.LEA_DELAY(LEA_DELAY)) u_lea (
    .clk, .rst_n, .enable, .veto, .trig_in(trig_detected), .clear_lea(emergency_clear),
    .trig_out(lea_trig_out), .ok(lea_ok), .blocked(lea_blocked), .armed(lea_armed),
    .lea_active(emergency_active));

  // A detected command is stopped when the emergency logic blocks it or a clear is pending.
  assign stop = enable && trig_detected &&
                (lea_blocked || emergency_clear || count_clear || id_clear);

  // When trig_detected is high, the command's two '1' bits sit in dl[3:2]; they are cleared as
  // they move to dl[4:3].
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dl <= '0;
    end else begin
      dl <= {dl[4:0], ser_in};
      if (stop) begin
        dl[3] <= 1'b0;
        dl[4] <= 1'b0;
      end
    end
  end
  assign ser_out = dl[5];

  assign busy_active = veto || emergency_active;
  assign rod_busy    = busy_active;

  fftv_monitor #(.BUSY_W(0), .VETO_BUSY_W(BUSY_CNT_W), .ID_W(ID_CNT_W), .VTRIG_W(0)) u_mon (
    .clk, .rst_n,
    .busy(busy_active), .fftv_busy(busy_active), .veto_start, .veto_trig(1'b0),
    .count_clear, .id_clear,
    .busy_time(none_busy), .veto_busy_time(busy_time), .veto_id, .veto_trigs(none_vtrig),
    .busy_time_roll(none_busy_roll), .veto_busy_time_roll(busy_time_roll),
    .veto_id_roll, .veto_trigs_roll(none_vtrig_roll));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_active_latch <= 1'b0;
      emergency_latch   <= 1'b0;
    end else begin
      busy_active_latch <= count_clear     ? 1'b0 : (busy_active_latch || busy_active);
      emergency_latch   <= emergency_clear ? 1'b0 : (emergency_latch || emergency_active);
    end
  end

endmodule
