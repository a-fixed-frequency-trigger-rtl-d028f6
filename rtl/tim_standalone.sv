// tim_standalone: stand-alone trigger sources of the TIM, inhibited by the veto.
//
// Three sources make a stand-alone trigger: the front-panel NIM and ECL inputs and the internal
// pseudo-random generator (tim_random_trigger). The front-panel levels are synchronised to the
// 40 MHz clock with two flip-flops and turned into one-cycle pulses on their rising edge. The
// sources are OR-ed into sa_trig, which is suppressed while inhibit (the veto) is high: in
// stand-alone mode the TIM vetoes its own triggers before they are numbered, so the trigger
// numbers stay consecutive and no busy feedback is needed. The surviving triggers are numbered
// by a trigger_number_gen.
//
// Interface: nim_in/ecl_in are asynchronous levels; sa_trig is a one-cycle pulse, two clock edges
// after a front-panel edge (in the same cycle as the internal generator output); the next clock
// brings sa_num_valid with its number on sa_trig_num. inhibited pulses for each trigger dropped
// by the veto. The OR of sources and the veto inhibit follow the
// published TIM trigger path; the synchroniser and edge detector are this design's choice.
module tim_standalone #(
  parameter int unsigned NUM_W = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             nim_in,
  input  logic             ecl_in,
  input  logic             int_enable,
  input  logic [4:0]       freq_setting,
  input  logic [7:0]       bunch_spacing,
  input  logic             inhibit,
  input  logic             ecr,
  output logic             sa_trig,
  output logic             inhibited,
  output logic             sa_num_valid,   // one clock after sa_trig
  output logic [NUM_W-1:0] sa_trig_num,    // number of that trigger
  output logic             int_trig
);

  logic [2:0] nim_s, ecl_s;
  logic       nim_p, ecl_p, any_trig;
  logic [NUM_W-1:0] next_num;
  logic [38:0] lfsr_state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nim_s <= '0;
      ecl_s <= '0;
    end else begin
      nim_s <= {nim_s[1:0], nim_in};
      ecl_s <= {ecl_s[1:0], ecl_in};
    end
  end

  assign nim_p = nim_s[1] && !nim_s[2];
  assign ecl_p = ecl_s[1] && !ecl_s[2];

  tim_random_trigger u_rand (
    .clk, .rst_n,
    .enable(int_enable), .freq_setting, .bunch_spacing,
    .trig(int_trig), .lfsr_state);

  assign any_trig  = nim_p || ecl_p || int_trig;
  assign sa_trig   = any_trig && !inhibit;
  assign inhibited = any_trig && inhibit;

  trigger_number_gen #(.W(NUM_W)) u_num (
    .clk, .rst_n, .ecr, .trig(sa_trig),
    .trig_out(sa_num_valid), .trig_num_out(sa_trig_num), .next_num);

endmodule
