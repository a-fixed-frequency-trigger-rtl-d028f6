// fftv_core: the fixed-frequency-trigger detection algorithm.
//
// A period counter counts 25 ns clock cycles since the last accepted trigger: it restarts from
// zero in the cycle after that trigger, so a trigger P clocks after the previous one finds the
// count P-1. When a trigger arrives the counted period is classified:
//   * shorter than PERIOD_MIN  - the trigger is ignored and the counter keeps running, so a
//                                short double trigger becomes part of a longer period;
//   * PERIOD_MIN..PERIOD_MAX   - the period is compared with the previous in-window period;
//                                if they differ by at most MATCH_TOL the match counter is
//                                incremented (period_match pulse), otherwise decremented.
//                                The period is then stored and the counter restarts;
//   * longer than PERIOD_MAX   - the trigger only restarts the counter and forgets the stored
//                                period, so slow periodic triggers pass.
// If no trigger is accepted for PERIOD_ROLLOVER clocks the counter restarts by itself, the
// stored period is forgotten and the match counter is decremented. When an increment brings the
// match counter to the match-level (programmable 2..10, other codes mean 10) the veto is raised
// for VETO_DURATION clocks. Match-level N therefore needs N matching periods, i.e. N+1 triggers.
//
// Interface: trig is a one-cycle pulse per trigger. enable low holds the whole algorithm in its
// reset state (veto off, counts zero); the counter starts from zero when enable rises, and the
// first period is measured from there. Timing: all outputs are registered; veto rises on the
// clock edge that samples the trigger completing the match (one cycle after the trigger pulse)
// and stays high for exactly VETO_DURATION cycles. The match counter is 4 bits and saturates.
//
// The classification rules, limits and veto behaviour follow the published algorithm; the
// handling of the stored period after a roll-over or an over-long period, the behaviour when
// enable is low and the one-cycle latency are choices of this implementation. Counting from zero
// follows the published description of the counter and reproduces the measured period scan,
// in which an 85-clock trigger period still counts as too short and 86 clocks is accepted.
module fftv_core
  import fftv_pkg::*;
#(
  parameter int unsigned PERIOD_MIN      = PERIOD_MIN_DEF,
  parameter int unsigned PERIOD_MAX      = PERIOD_MAX_DEF,
  parameter int unsigned PERIOD_ROLLOVER = PERIOD_ROLLOVER_DEF,
  parameter int unsigned MATCH_TOL       = MATCH_TOL_DEF,
  parameter int unsigned VETO_DURATION   = VETO_DURATION_DEF,
  localparam int unsigned PW = $clog2(PERIOD_ROLLOVER + 1),
  localparam int unsigned VW = $clog2(VETO_DURATION + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,        // FFTV enabled (not disabled by jumper + register bit)
  input  logic          trig,          // one-cycle trigger pulse
  input  logic [3:0]    match_level,   // programmable 2..10, others mean 10
  output logic          veto,          // veto active
  output logic          veto_start,    // one-cycle pulse when a veto begins
  output logic          period_match,  // one-cycle pulse per matching period
  output logic          rollover,      // one-cycle pulse when the period counter rolls over
  output logic [3:0]    match_count,
  output logic [PW-1:0] period_count
);

  logic [PW-1:0] prev_period;
  logic          prev_valid;
  logic [VW-1:0] veto_cnt;

  logic [3:0]    level;
  logic          accept, in_window, too_long, roll, is_match;
  logic [PW-1:0] diff;
  logic [3:0]    match_next;
  logic          raise_veto;

  assign level     = effective_match_level(match_level);
  assign accept    = trig && (period_count >= PW'(PERIOD_MIN));
  assign in_window = accept && (period_count <= PW'(PERIOD_MAX));
  assign too_long  = accept && (period_count > PW'(PERIOD_MAX));
  assign roll      = !trig && (period_count >= PW'(PERIOD_ROLLOVER));
  assign diff      = (period_count >= prev_period) ? period_count - prev_period
                                                   : prev_period - period_count;
  assign is_match  = in_window && prev_valid && (diff <= PW'(MATCH_TOL));

  always_comb begin
    match_next = match_count;
    if (is_match) begin
      if (match_count != 4'hF) match_next = match_count + 4'd1;
    end else if ((in_window && prev_valid) || roll) begin
      if (match_count != 4'd0) match_next = match_count - 4'd1;
    end
  end

  assign raise_veto = is_match && (match_next >= level) && (veto_cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      period_count <= '0;
      prev_period  <= '0;
      prev_valid   <= 1'b0;
      match_count  <= '0;
      veto_cnt     <= '0;
      veto_start   <= 1'b0;
      period_match <= 1'b0;
      rollover     <= 1'b0;
    end else if (!enable) begin
      period_count <= '0;
      prev_period  <= '0;
      prev_valid   <= 1'b0;
      match_count  <= '0;
      veto_cnt     <= '0;
      veto_start   <= 1'b0;
      period_match <= 1'b0;
      rollover     <= 1'b0;
    end else begin
      match_count  <= match_next;
      period_match <= is_match;
      rollover     <= roll;
      veto_start   <= raise_veto;

      if (accept || roll) period_count <= '0;
      else                period_count <= period_count + PW'(1);

      if (in_window) begin
        prev_period <= period_count;
        prev_valid  <= 1'b1;
      end else if (too_long || roll) begin
        prev_valid  <= 1'b0;
      end

      if (raise_veto)          veto_cnt <= VW'(VETO_DURATION);
      else if (veto_cnt != '0) veto_cnt <= veto_cnt - VW'(1);
    end
  end

  assign veto = (veto_cnt != '0);

endmodule
