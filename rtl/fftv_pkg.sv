// fftv_pkg: constants shared by the fixed-frequency-trigger veto (FFTV) modules.
//
// Holds the final, hard-coded algorithm settings (all counted in 25 ns clock cycles of the
// 40 MHz bunch-crossing clock), the match-level decoding rule and the 16-bit register map of
// the TIM crate-controller interface. The algorithm values and the register addresses/bit
// positions that are listed as "published" below are the ones the FFTV design specifies; the
// others are choices of this implementation and are marked as such.
package fftv_pkg;

  // ---- Final algorithm settings (published) -------------------------------------------
  localparam int unsigned PERIOD_MIN_DEF      = 85;     // lower period limit, 471 kHz
  localparam int unsigned PERIOD_MAX_DEF      = 2666;   // upper period limit, 15 kHz
  localparam int unsigned MATCH_TOL_DEF       = 40;     // period match tolerance, 1 us
  localparam int unsigned VETO_DURATION_DEF   = 40000;  // veto length, 1 ms
  localparam int unsigned MATCH_LEVEL_DEF     = 10;     // default / maximum match-level
  localparam int unsigned MATCH_LEVEL_MIN     = 2;      // minimum programmable match-level
  // Period roll-over: only published for the illustrative simulation set-up (4100 clocks);
  // that value is reused here.
  localparam int unsigned PERIOD_ROLLOVER_DEF = 4100;
  // Delay from veto to Local Emergency Action: ~2 us = 80 clocks.
  localparam int unsigned LEA_DELAY_DEF       = 80;

  // A match-level outside 2..10 falls back to 10.
  function automatic logic [3:0] effective_match_level(input logic [3:0] lvl);
    return (lvl >= 4'(MATCH_LEVEL_MIN) && lvl <= 4'(MATCH_LEVEL_DEF)) ? lvl
                                                                      : 4'(MATCH_LEVEL_DEF);
  endfunction

  // ---- TIM register map (16-bit registers, byte addresses) ----------------------------
  // Published addresses:
  localparam logic [7:0] A_RODBUSY_STATUS = 8'h20;
  localparam logic [7:0] A_RODBUSY_LATCH  = 8'h22;
  localparam logic [7:0] A_CONTROL        = 8'h46;  // bit 0 Clear-LEA
  localparam logic [7:0] A_BUSY_STATUS3   = 8'h5A;  // bit 10 RodBusy, 13 LEA, 14 Veto
  localparam logic [7:0] A_BUSY_STATUS3_L = 8'h5E;
  localparam logic [7:0] A_BUSY_CNT0      = 8'h60;  // 48-bit overall busy count
  localparam logic [7:0] A_BUSY_CNT1      = 8'h62;
  localparam logic [7:0] A_BUSY_CNT2      = 8'h64;
  localparam logic [7:0] A_FFTV_CNT0      = 8'h74;  // 48-bit veto busy count
  localparam logic [7:0] A_FFTV_CNT1      = 8'h76;
  localparam logic [7:0] A_FFTV_CNT2      = 8'h78;
  localparam logic [7:0] A_VETO_ID0       = 8'h84;  // 32-bit veto count
  localparam logic [7:0] A_VETO_ID1       = 8'h86;
  // Addresses chosen by this implementation:
  localparam logic [7:0] A_FFTV_CONFIG    = 8'h48;  // [3:0] match-level, [4] disable bit
  localparam logic [7:0] A_VETO_TRIG0     = 8'h88;  // 32-bit triggers seen during veto
  localparam logic [7:0] A_VETO_TRIG1     = 8'h8A;

  // Bit positions in Busy Status3 and its latch (published).
  localparam int unsigned BS3_RODBUSY = 10;
  localparam int unsigned BS3_LEA     = 13;
  localparam int unsigned BS3_VETO    = 14;

  // Control register bits: bit 0 is published, bits 1-2 are this implementation's choice.
  localparam int unsigned CTL_CLEAR_LEA   = 0;
  localparam int unsigned CTL_COUNT_CLEAR = 1;
  localparam int unsigned CTL_ID_CLEAR    = 2;

endpackage
