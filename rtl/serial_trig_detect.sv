// serial_trig_detect: finds serial trigger commands in a one-bit-per-clock command stream.
//
// On the read-out driver the triggers are generated by DSPs as serial commands rather than as
// pulses, so the veto sits behind a detector that recognises the trigger command "0110" (first
// bit first). The last four serial bits are kept in a shift register; when they read 0,1,1,0
// a one-cycle trig pulse is produced. The command's leading zero means two back-to-back
// commands "0110110" are both seen.
//
// Interface: ser_in is sampled on every clock (the command bit rate is the clock rate);
// trig is registered and pulses on the clock edge after the edge that sampled the last "0",
// i.e. two clocks after that bit was presented. The pattern follows the published one; the
// bit order and latency are this implementation's choice.
module serial_trig_detect (
  input  logic clk,
  input  logic rst_n,
  input  logic ser_in,
  output logic trig
);

  logic [3:0] sr;   // sr[0] is the newest bit

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= '0;
      trig <= 1'b0;
    end else begin
      sr   <= {sr[2:0], ser_in};
      trig <= (sr == 4'b0110);
    end
  end

endmodule
