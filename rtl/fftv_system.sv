// fftv_system: a ROD crate's trigger protection against fixed-frequency triggers.
//
// The veto is placed at both levels of the crate: in the TTC interface module (TIM), which
// distributes every trigger to the read-out drivers (RODs), and in a ROD, which can also send
// triggers of its own. This top holds one TIM trigger path (tim_fftv) and one ROD veto
// (rod_fftv). The ROD's busy joins the TIM's busy OR on the ROD0-Busy input, so a veto raised
// on the ROD also reaches the central trigger processor (CTP). The other 15 ROD busy lines,
// the TTC trigger and all configuration are ports.
//
// Interface and timing are those of the two blocks: a single 40 MHz clock, active-low
// asynchronous reset, one-cycle trigger pulses. Putting one ROD next to the TIM and feeding
// its busy into ROD0-Busy is this top's choice; the TIM-ROD busy OR is the published one.
module fftv_system
  import fftv_pkg::*;
#(
  parameter int unsigned NUM_W = 24,
  localparam int unsigned PW = $clog2(PERIOD_ROLLOVER_DEF + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // TIM stand-alone sources
  input  logic             nim_in,
  input  logic             ecl_in,
  input  logic             int_enable,
  input  logic [4:0]       freq_setting,
  input  logic [7:0]       bunch_spacing,
  input  logic             ecr,
  // TTC (run mode)
  input  logic             ttc_trig,
  input  logic             ttc_clk_ok,
  // busy
  input  logic [15:0]      rod_busy_in,     // bit 0 is OR-ed with the ROD veto's busy
  output logic             rod_busy_out,    // to CTP
  // TIM outputs
  output logic             trigger_out,
  output logic             tim_ok,
  output logic             sa_num_valid,
  output logic [NUM_W-1:0] sa_trig_num,
  output logic             ttc_num_valid,
  output logic [NUM_W-1:0] ttc_trig_num,
  input  logic             fftv_jumper,
  input  logic [7:0]       reg_addr,
  input  logic             reg_wr,
  input  logic [15:0]      reg_wdata,
  output logic [15:0]      reg_rdata,
  output logic             tim_veto,
  output logic             tim_lea_active,
  output logic             tim_period_match,
  output logic [3:0]       tim_match_count,
  output logic [PW-1:0]    tim_period_count,
  // ROD
  input  logic             rod_ser_in,
  output logic             rod_ser_out,
  input  logic             rod_pixel,       // I-Am-A-Pixel-ROD: disables the ROD veto
  input  logic [3:0]       rod_match_level,
  input  logic             rod_emergency_clear,
  input  logic             rod_count_clear,
  input  logic             rod_id_clear,
  output logic [23:0]      rod_busy_time,
  output logic [7:0]       rod_veto_id,
  output logic             rod_busy_time_roll,
  output logic             rod_veto_id_roll,
  output logic             rod_busy_active,
  output logic             rod_busy_active_latch,
  output logic             rod_emergency_active,
  output logic             rod_emergency_latch,
  output logic             rod_trig_detected,
  output logic             rod_veto
);

  logic rod_busy;

  rod_fftv u_rod (
    .clk, .rst_n, .ser_in(rod_ser_in), .ser_out(rod_ser_out), .fftv_disable(rod_pixel),
    .match_level(rod_match_level), .emergency_clear(rod_emergency_clear),
    .count_clear(rod_count_clear), .id_clear(rod_id_clear),
    .busy_time(rod_busy_time), .veto_id(rod_veto_id),
    .busy_time_roll(rod_busy_time_roll), .veto_id_roll(rod_veto_id_roll),
    .busy_active(rod_busy_active), .busy_active_latch(rod_busy_active_latch),
    .emergency_active(rod_emergency_active), .emergency_latch(rod_emergency_latch),
    .rod_busy, .trig_detected(rod_trig_detected), .veto(rod_veto));

  tim_fftv #(.NUM_W(NUM_W)) u_tim (
    .clk, .rst_n, .nim_in, .ecl_in, .int_enable, .freq_setting, .bunch_spacing, .ecr,
    .ttc_trig, .ttc_clk_ok,
    .rod_busy_in({rod_busy_in[15:1], rod_busy_in[0] | rod_busy}),
    .rod_busy_out, .trigger_out, .tim_ok, .sa_num_valid, .sa_trig_num,
    .ttc_num_valid, .ttc_trig_num, .fftv_jumper,
    .reg_addr, .reg_wr, .reg_wdata, .reg_rdata,
    .veto(tim_veto), .lea_active(tim_lea_active), .period_match(tim_period_match),
    .match_count(tim_match_count), .period_count(tim_period_count));

endmodule
