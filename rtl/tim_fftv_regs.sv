// tim_fftv_regs: crate-controller register block for the TIM's fixed-frequency-trigger veto.
//
// A simple 16-bit register port (byte address, write strobe, combinational read data) gives the
// crate controller the FFTV status and counters:
//   0x20 RODBusy status  - the 16 ROD busy inputs, live
//   0x22 RODBusy latch   - the same, latched; a write clears the bits written as 1
//   0x46 control         - write-only command bits: 0 Clear-LEA, 1 clear busy timers,
//                          2 clear veto counters (each a one-cycle pulse, reads 0)
//   0x48 FFTV config     - [3:0] match-level (reset 10), [4] software part of the FFTV disable
//   0x5A Busy Status3    - bit 10 busy output to the CTP, bit 13 LEA active, bit 14 veto
//   0x5E Busy Status3 latch - the same bits latched; a write clears the bits written as 1
//   0x60/62/64           - 48-bit overall busy count, least significant word first
//   0x74/76/78           - 48-bit FFTV busy count, least significant word first
//   0x84/86              - 32-bit veto count (Veto ID), least significant word first
//   0x88/8A              - 32-bit count of triggers received while the veto was active
// Unlisted addresses read 0.
//
// Timing: writes act on the clock edge with wr high; rdata follows addr in the same cycle.
// Published: the addresses 0x20, 0x22, 0x46 (bit 0), 0x5A and 0x5E with their bit positions
// and the counter addresses. Chosen here: the bus form, the word order, the clear-by-writing-1
// rule of the latches, control bits 1-2, and the addresses 0x48 and 0x88/8A. The RODBusy
// monitor register (0x24) is not described in enough detail and reads 0.
module tim_fftv_regs
  import fftv_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // register port
  input  logic [7:0]  addr,
  input  logic        wr,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  // status in
  input  logic [15:0] rod_busy_in,
  input  logic        busy_out,
  input  logic        veto,
  input  logic        lea_active,
  input  logic [47:0] busy_time,
  input  logic [47:0] veto_busy_time,
  input  logic [31:0] veto_id,
  input  logic [31:0] veto_trigs,
  // control out
  output logic        clear_lea,
  output logic        count_clear,
  output logic        id_clear,
  output logic [3:0]  match_level,
  output logic        sw_disable
);

  logic [15:0] rod_busy_latch;
  logic [15:0] bs3, bs3_latch;

  always_comb begin
    bs3              = '0;
    bs3[BS3_RODBUSY] = busy_out;
    bs3[BS3_LEA]     = lea_active;
    bs3[BS3_VETO]    = veto;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rod_busy_latch <= '0;
      bs3_latch      <= '0;
      clear_lea      <= 1'b0;
      count_clear    <= 1'b0;
      id_clear       <= 1'b0;
      match_level    <= 4'(MATCH_LEVEL_DEF);
      sw_disable     <= 1'b0;
    end else begin
      clear_lea   <= wr && (addr == A_CONTROL) && wdata[CTL_CLEAR_LEA];
      count_clear <= wr && (addr == A_CONTROL) && wdata[CTL_COUNT_CLEAR];
      id_clear    <= wr && (addr == A_CONTROL) && wdata[CTL_ID_CLEAR];

      if (wr && addr == A_RODBUSY_LATCH) rod_busy_latch <= (rod_busy_latch & ~wdata) | rod_busy_in;
      else                               rod_busy_latch <= rod_busy_latch | rod_busy_in;

      if (wr && addr == A_BUSY_STATUS3_L) bs3_latch <= (bs3_latch & ~wdata) | bs3;
      else                                bs3_latch <= bs3_latch | bs3;

      if (wr && addr == A_FFTV_CONFIG) begin
        match_level <= wdata[3:0];
        sw_disable  <= wdata[4];
      end
    end
  end

  always_comb begin
    unique case (addr)
      A_RODBUSY_STATUS: rdata = rod_busy_in;
      A_RODBUSY_LATCH:  rdata = rod_busy_latch;
      A_FFTV_CONFIG:    rdata = {11'd0, sw_disable, match_level};
      A_BUSY_STATUS3:   rdata = bs3;
      A_BUSY_STATUS3_L: rdata = bs3_latch;
      A_BUSY_CNT0:      rdata = busy_time[15:0];
      A_BUSY_CNT1:      rdata = busy_time[31:16];
      A_BUSY_CNT2:      rdata = busy_time[47:32];
      A_FFTV_CNT0:      rdata = veto_busy_time[15:0];
      A_FFTV_CNT1:      rdata = veto_busy_time[31:16];
      A_FFTV_CNT2:      rdata = veto_busy_time[47:32];
      A_VETO_ID0:       rdata = veto_id[15:0];
      A_VETO_ID1:       rdata = veto_id[31:16];
      A_VETO_TRIG0:     rdata = veto_trigs[15:0];
      A_VETO_TRIG1:     rdata = veto_trigs[31:16];
      default:          rdata = '0;
    endcase
  end

endmodule
