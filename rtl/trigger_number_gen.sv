// trigger_number_gen: trigger (event) number generator.
//
// Counts the triggers it is given and presents the number the next trigger will carry; each
// trigger pulse is accompanied by its number on trig_num_out in the following cycle. Because the
// TIM vetoes stand-alone triggers before they reach this counter, the numbers stay consecutive
// across a veto. A synchronous reset (ecr, event-counter reset) zeroes the number.
//
// Interface: trig is a one-cycle pulse; trig_out repeats it one clock later together with
// trig_num_out, the number assigned to it; next_num is the number the next trigger will get.
// The width (24 bits) and the event-counter reset are this implementation's choices: only the
// existence of the generator and its place in the trigger path are specified.
module trigger_number_gen #(
  parameter int unsigned W = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ecr,
  input  logic         trig,
  output logic         trig_out,
  output logic [W-1:0] trig_num_out,
  output logic [W-1:0] next_num
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      next_num     <= '0;
      trig_out     <= 1'b0;
      trig_num_out <= '0;
    end else begin
      trig_out <= trig && !ecr;
      if (ecr) begin
        next_num <= '0;
      end else if (trig) begin
        trig_num_out <= next_num;
        next_num     <= next_num + W'(1);
      end
    end
  end

endmodule
