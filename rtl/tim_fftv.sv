// tim_fftv: trigger path of the TTC interface module (TIM) with the fixed-frequency-trigger veto.
//
// Triggers come either from the stand-alone sources (front-panel NIM/ECL, internal random
// generator; tim_standalone) or from the TTC system (ttc_trig, already decoded). Both are
// numbered, then OR-ed into the trigger that goes to the read-out drivers (RODs). That trigger
// stream feeds the FFTV algorithm (fftv_core) whatever its source. When a veto is raised:
//   * stand-alone sources are inhibited at once, before they are numbered (stand-alone mode);
//   * the busy to the central trigger processor (CTP) is asserted for the veto duration, which
//     is the only way to stop TTC triggers (run mode);
//   * triggers still arriving ~2 us after the veto start the Local Emergency Action
//     (fftv_lea): all triggers are stopped, busy stays asserted and tim_ok drops until a
//     Clear-LEA command is written after the veto has ended.
// The busy to the CTP is the OR of the veto, the emergency and the 16 ROD busy inputs.
// fftv_monitor counts total and FFTV busy time, vetoes and triggers seen during vetoes, and
// tim_fftv_regs makes all of it readable by the crate controller. The veto is disabled only
// when the jumper is fitted AND the software disable bit is set.
//
// Interface: single 40 MHz clock domain, active-low asynchronous reset; trigger inputs except
// the asynchronous front-panel levels are one-cycle pulses; trigger_out is combinational from
// the OR-ed trigger. Timing: the veto rises one clock after the trigger that completes the
// match; busy follows the veto combinationally.
//
// The structure (OR of sources, veto to the stand-alone inhibit and to the busy OR, emergency
// gate on the trigger output) follows the published TIM block diagram. Counting inhibited
// stand-alone triggers as "received during the veto" and the clock-good input of tim_ok are
// this implementation's choices.
module tim_fftv
  import fftv_pkg::*;
#(
  parameter int unsigned PERIOD_MIN      = PERIOD_MIN_DEF,
  parameter int unsigned PERIOD_MAX      = PERIOD_MAX_DEF,
  parameter int unsigned PERIOD_ROLLOVER = PERIOD_ROLLOVER_DEF,
  parameter int unsigned MATCH_TOL       = MATCH_TOL_DEF,
  parameter int unsigned VETO_DURATION   = VETO_DURATION_DEF,
  parameter int unsigned LEA_DELAY       = LEA_DELAY_DEF,
  parameter int unsigned NUM_W           = 24,
  localparam int unsigned PW = $clog2(PERIOD_ROLLOVER + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // stand-alone trigger sources
  input  logic             nim_in,
  input  logic             ecl_in,
  input  logic             int_enable,
  input  logic [4:0]       freq_setting,
  input  logic [7:0]       bunch_spacing,
  input  logic             ecr,            // event-counter reset for both number generators
  // run mode
  input  logic             ttc_trig,
  input  logic             ttc_clk_ok,     // TTC clock selected and good
  // busy
  input  logic [15:0]      rod_busy_in,
  output logic             rod_busy_out,   // to CTP
  // trigger out
  output logic             trigger_out,
  output logic             tim_ok,
  output logic             sa_num_valid,
  output logic [NUM_W-1:0] sa_trig_num,
  output logic             ttc_num_valid,
  output logic [NUM_W-1:0] ttc_trig_num,
  // veto disable jumper
  input  logic             fftv_jumper,
  // crate-controller register port
  input  logic [7:0]       reg_addr,
  input  logic             reg_wr,
  input  logic [15:0]      reg_wdata,
  output logic [15:0]      reg_rdata,
  // test points
  output logic             veto,
  output logic             lea_active,
  output logic             period_match,
  output logic [3:0]       match_count,
  output logic [PW-1:0]    period_count
);

  logic        fftv_enable, sw_disable;
  logic        sa_trig, sa_inhibited, int_trig;
  logic        trigger, veto_start, rollover;
  logic        lea_ok, lea_blocked, lea_armed;
  logic        clear_lea, count_clear, id_clear;
  logic [3:0]  match_level;
  logic [47:0] busy_time, veto_busy_time;
  logic [31:0] veto_id, veto_trigs;
  logic        busy_roll, vbusy_roll, id_roll, vtrig_roll;
  logic [NUM_W-1:0] ttc_next_num;

  assign fftv_enable = !(fftv_jumper && sw_disable);

  tim_standalone #(.NUM_W(NUM_W)) u_sa (
    .clk, .rst_n, .nim_in, .ecl_in, .int_enable, .freq_setting, .bunch_spacing,
    .inhibit(veto), .ecr,
    .sa_trig, .inhibited(sa_inhibited), .sa_num_valid, .sa_trig_num, .int_trig);

  trigger_number_gen #(.W(NUM_W)) u_ttc_num (
    .clk, .rst_n, .ecr, .trig(ttc_trig),
    .trig_out(ttc_num_valid), .trig_num_out(ttc_trig_num), .next_num(ttc_next_num));

  assign trigger = sa_trig || ttc_trig;

  fftv_core #(
    .PERIOD_MIN(PERIOD_MIN), .PERIOD_MAX(PERIOD_MAX), .PERIOD_ROLLOVER(PERIOD_ROLLOVER),
    .MATCH_TOL(MATCH_TOL), .VETO_DURATION(VETO_DURATION)
  ) u_core (
    .clk, .rst_n, .enable(fftv_enable), .trig(trigger), .match_level,
    .veto, .veto_start, .period_match, .rollover, .match_count, .period_count);

  fftv_lea #(.LEA_DELAY(LEA_DELAY)) u_lea (
    .clk, .rst_n, .enable(fftv_enable), .veto, .trig_in(trigger), .clear_lea,
    .trig_out(trigger_out), .ok(lea_ok), .blocked(lea_blocked), .armed(lea_armed),
    .lea_active);

  assign rod_busy_out = veto || lea_active || (|rod_busy_in);
  assign tim_ok       = ttc_clk_ok && !lea_active;

  fftv_monitor #(.BUSY_W(48), .VETO_BUSY_W(48), .ID_W(32), .VTRIG_W(32)) u_mon (
    .clk, .rst_n,
    .busy(rod_busy_out), .fftv_busy(veto || lea_active), .veto_start,
    .veto_trig(veto && (trigger || sa_inhibited)),
    .count_clear, .id_clear,
    .busy_time, .veto_busy_time, .veto_id, .veto_trigs,
    .busy_time_roll(busy_roll), .veto_busy_time_roll(vbusy_roll),
    .veto_id_roll(id_roll), .veto_trigs_roll(vtrig_roll));

  tim_fftv_regs u_regs (
    .clk, .rst_n,
    .addr(reg_addr), .wr(reg_wr), .wdata(reg_wdata), .rdata(reg_rdata),
    .rod_busy_in, .busy_out(rod_busy_out), .veto, .lea_active,
    .busy_time, .veto_busy_time, .veto_id, .veto_trigs,
    .clear_lea, .count_clear, .id_clear, .match_level, .sw_disable);

endmodule
