// tim_random_trigger: pseudo-random internal trigger generator with bunch-spacing gating.
//
// A 39-bit linear-feedback shift register advances once per 40 MHz clock: bits 39..2 take
// bits 38..1 and bit 1 takes NOT(bit 39 XOR bit 35). Each bit is 1 about half of the time, so
// demanding that a chosen set of k bits all be 1 gives a pseudo-random trigger at about
// 40 MHz / 2^k. The randomiser frequency setting (0..23; 23 and above = every clock) picks
// that set of bits from a fixed table: setting 14 gives about 80 kHz, each step down halves
// the rate. To emulate LHC fills with widely spaced bunches the result is gated by a one-clock
// pulse every bunch_spacing clocks (0 and 1 mean every clock; 22 and 82 are typical).
//
// Interface: enable starts the generator (the LFSR runs regardless); trig is a registered
// one-cycle pulse, produced one clock after the LFSR state that satisfies the mask. Changing
// bunch_spacing takes effect when the phase counter next wraps.
//
// The shift/feedback structure and the bit masks are those of the published randomiser; the
// reset state (all zeros, legal for an XNOR register), the 5-bit setting, the 8-bit spacing
// and the phase-counter form of the gate are this implementation's choices.
module tim_random_trigger (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic [4:0] freq_setting,   // randomiser frequency setting
  input  logic [7:0] bunch_spacing,  // gate period in clocks
  output logic       trig,
  output logic [38:0] lfsr_state     // bit k holds LFSR bit k+1
);

  logic [38:0] lfsr;
  logic [38:0] mask;
  logic [7:0]  phase;
  logic        gate;

  // Bits that must all be 1 for a trigger, as {bits 39..33, bits 32..1}.
  function automatic logic [38:0] freq_mask(input logic [4:0] s);
    case (s)
      5'd0:    return {7'h5D, 32'h77577555};
      5'd1:    return {7'h55, 32'h75577555};
      5'd2:    return {7'h55, 32'h55575555};
      5'd3:    return {7'h51, 32'h55575555};
      5'd4:    return {7'h51, 32'h45575555};
      5'd5:    return {7'h51, 32'h45175555};
      5'd6:    return {7'h51, 32'h45165555};
      5'd7:    return {7'h51, 32'h45165155};
      5'd8:    return {7'h51, 32'h45165145};
      5'd9:    return {7'h41, 32'h45165145};
      5'd10:   return {7'h41, 32'h05165145};
      5'd11:   return {7'h41, 32'h04165145};
      5'd12:   return {7'h41, 32'h04125145};
      5'd13:   return {7'h41, 32'h04124145};
      5'd14:   return {7'h41, 32'h04124105};
      5'd15:   return {7'h41, 32'h04124104};
      5'd16:   return {7'h41, 32'h04104104};
      5'd17:   return {7'h10, 32'h40810202};
      5'd18:   return {7'h04, 32'h08081010};
      5'd19:   return {7'h20, 32'h04004004};
      5'd20:   return {7'h01, 32'h00100040};
      5'd21:   return {7'h00, 32'h10000200};
      5'd22:   return {7'h00, 32'h00080000};
      default: return '0;
    endcase
  endfunction

  assign mask       = freq_mask(freq_setting);
  assign gate       = (phase == 8'd0);
  assign lfsr_state = lfsr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr  <= '0;
      phase <= '0;
      trig  <= 1'b0;
    end else begin
      lfsr  <= {lfsr[37:0], ~(lfsr[38] ^ lfsr[34])};
      phase <= (phase + 8'd1 >= bunch_spacing) ? 8'd0 : phase + 8'd1;
      trig  <= enable && gate && ((lfsr & mask) == mask);
    end
  end

endmodule
