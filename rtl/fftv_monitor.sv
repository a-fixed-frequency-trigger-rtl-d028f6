// fftv_monitor: dead-time and veto book-keeping of the fixed-frequency-trigger veto.
//
// Four free-running counters, each with a latching roll-over flag:
//   busy_time      - clock periods (25 ns) during which the busy output is asserted for any
//                    reason (the overall Busy-Timer);
//   veto_busy_time - clock periods during which the busy is asserted for FFTV reasons (veto or
//                    emergency), so the veto's share of the dead-time can be monitored;
//   veto_id        - number of vetoes raised;
//   veto_trigs     - number of triggers received while the veto was active.
// A counter whose width parameter is 0 is left out (its output reads 0), which gives the
// reduced read-out-driver variant. count_clear clears the two timers and their flags, id_clear
// the two event counters and theirs; both act while held high.
//
// Timing: every counter updates on the clock edge that samples its input, so a value read in
// cycle n counts the inputs of cycles before n. Widths follow the published TIM sizes (48, 48
// and 32 bits; 48 bits roll over after 81 days at 40 MHz); the width of veto_trigs and the
// clear behaviour are this implementation's choice.
module fftv_monitor #(
  parameter int unsigned BUSY_W      = 48,
  parameter int unsigned VETO_BUSY_W = 48,
  parameter int unsigned ID_W        = 32,
  parameter int unsigned VTRIG_W     = 32,
  localparam int unsigned BO = (BUSY_W      > 0) ? BUSY_W      : 1,
  localparam int unsigned VO = (VETO_BUSY_W > 0) ? VETO_BUSY_W : 1,
  localparam int unsigned IO = (ID_W        > 0) ? ID_W        : 1,
  localparam int unsigned TO = (VTRIG_W     > 0) ? VTRIG_W     : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          busy,           // busy output asserted (any reason)
  input  logic          fftv_busy,      // busy asserted because of veto / emergency
  input  logic          veto_start,     // one-cycle pulse per veto
  input  logic          veto_trig,      // one-cycle pulse per trigger received during veto
  input  logic          count_clear,
  input  logic          id_clear,
  output logic [BO-1:0] busy_time,
  output logic [VO-1:0] veto_busy_time,
  output logic [IO-1:0] veto_id,
  output logic [TO-1:0] veto_trigs,
  output logic          busy_time_roll,
  output logic          veto_busy_time_roll,
  output logic          veto_id_roll,
  output logic          veto_trigs_roll
);

  fftv_event_counter #(.W(BUSY_W)) u_busy (
    .clk, .rst_n, .clear(count_clear), .inc(busy),
    .count(busy_time), .roll(busy_time_roll));

  fftv_event_counter #(.W(VETO_BUSY_W)) u_vbusy (
    .clk, .rst_n, .clear(count_clear), .inc(fftv_busy),
    .count(veto_busy_time), .roll(veto_busy_time_roll));

  fftv_event_counter #(.W(ID_W)) u_id (
    .clk, .rst_n, .clear(id_clear), .inc(veto_start),
    .count(veto_id), .roll(veto_id_roll));

  fftv_event_counter #(.W(VTRIG_W)) u_vtrig (
    .clk, .rst_n, .clear(id_clear), .inc(veto_trig),
    .count(veto_trigs), .roll(veto_trigs_roll));

endmodule
