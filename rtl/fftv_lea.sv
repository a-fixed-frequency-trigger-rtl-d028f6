// fftv_lea: Local Emergency Action of the fixed-frequency-trigger veto.
//
// Raising the veto (and with it the busy to the central trigger) cannot stop triggers at once:
// the busy needs a round trip. Triggers are therefore let through for LEA_DELAY clocks after
// the veto rises (~2 us). Any trigger that arrives later while the veto is still active is
// discarded and starts the emergency: from then on every trigger is stopped, the emergency
// flag stays set (the busy is meant to stay asserted and the crate "OK" signal to drop), until
// clear_lea is given while the veto is no longer active. A clear during the veto is ignored.
//
// Interface: trig_in is a one-cycle trigger pulse, trig_out is the same pulse when allowed.
// ok is combinational, so the trigger that starts the emergency is itself blocked; blocked
// pulses for every stopped trigger. lea_active is registered (set the cycle after the trigger
// that starts it). enable low clears the emergency and lets every trigger pass.
//
// The ~2 us grace time, the indefinite stop and the clear rule follow the published
// behaviour; the counter structure and the enable handling are this implementation's choice.
module fftv_lea
  import fftv_pkg::LEA_DELAY_DEF;
#(
  parameter int unsigned LEA_DELAY = LEA_DELAY_DEF,
  localparam int unsigned DW = $clog2(LEA_DELAY + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  logic veto,
  input  logic trig_in,
  input  logic clear_lea,
  output logic trig_out,
  output logic ok,
  output logic blocked,
  output logic armed,
  output logic lea_active
);

  logic [DW-1:0] dcnt;   // clocks since the veto rose, saturating at LEA_DELAY

  assign armed    = enable && veto && (dcnt >= DW'(LEA_DELAY));
  assign ok       = !(lea_active || (armed && trig_in));
  assign trig_out = trig_in && ok;
  assign blocked  = trig_in && !ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dcnt       <= '0;
      lea_active <= 1'b0;
    end else if (!enable) begin
      dcnt       <= '0;
      lea_active <= 1'b0;
    end else begin
      if (!veto)                    dcnt <= '0;
      else if (dcnt < DW'(LEA_DELAY)) dcnt <= dcnt + DW'(1);

      if (armed && trig_in)         lea_active <= 1'b1;
      else if (clear_lea && !veto)  lea_active <= 1'b0;
    end
  end

endmodule
