// fftv_event_counter: W-bit wrapping counter with a latching roll-over flag.
//
// count increments on every clock edge that samples inc high; when it wraps from all-ones to
// zero, roll is set and stays set until clear. clear (synchronous, level) zeroes both. With
// W = 0 the counter does not exist: count and roll read 0. Used for the busy timers and veto
// counters of the fixed-frequency-trigger veto.
module fftv_event_counter #(
  parameter int unsigned W = 32,
  localparam int unsigned OW = (W > 0) ? W : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          inc,
  output logic [OW-1:0] count,
  output logic          roll
);

  if (W > 0) begin : g_cnt
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        count <= '0;
        roll  <= 1'b0;
      end else if (clear) begin
        count <= '0;
        roll  <= 1'b0;
      end else if (inc) begin
        count <= count + OW'(1);
        if (&count) roll <= 1'b1;
      end
    end
  end else begin : g_none
    assign count = '0;
    assign roll  = 1'b0;
  end

endmodule
