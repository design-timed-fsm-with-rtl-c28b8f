// traffic_light_fsm -- timed Moore control FSM of a pedestrian-crossing traffic
// light, built from the two-process timed-FSM template.
//
// Inputs: Onn switches the controller on (night mode: the road's yellow lamp
// flashes, a1/a7), St starts the day cycle a2 -> a3 -> a4 -> a5 -> a2, and Btn is
// the pedestrian button, an event that is only accepted in a window [A5_C1,A5_C2]
// of the road-green state a5. An accepted Btn moves the FSM to a6: road red at
// once, crossing green after TD_G2 cycles; after TO6 cycles a6 hands over to the
// yellow state a4 and the day cycle resumes.
//
// Structure: tfsm_state_reg (state + cycle counter, asynchronous reset),
// tfsm_next_state (transitions, timeouts, event window) and tfsm_outputs (Moore
// outputs with output delay). All times are in clock cycles. Outputs are
// combinational decodes of registered state and counter, valid after each rising
// edge. State and counter are brought out for observation; that, and the
// separate output module, are this design's choices, the rest follows the
// original two-process template. The assertions use the asynchronous reset as
// their disable condition, which Verilator notes as a reset used both ways; it
// affects only the checks, not the logic.
module traffic_light_fsm
  import tfsm_pkg::*;
#(
  parameter int unsigned COUNT_W = tfsm_pkg::COUNT_W_DEF,
  parameter int unsigned TO1     = tfsm_pkg::TO1_DEF,
  parameter int unsigned TO2     = tfsm_pkg::TO2_DEF,
  parameter int unsigned TO3     = tfsm_pkg::TO3_DEF,
  parameter int unsigned TO6     = tfsm_pkg::TO6_DEF,
  parameter int unsigned A5_C1   = tfsm_pkg::A5_C1_DEF,
  parameter int unsigned A5_C2   = tfsm_pkg::A5_C2_DEF,
  parameter int unsigned TD_G2   = tfsm_pkg::TD_G2_DEF
) (
  input  logic               clk,
  input  logic               reset,   // asynchronous, active high
  input  logic               onn,
  input  logic               st,
  input  logic               btn,
  output logic               r1,
  output logic               ygr,
  output logic               yrg,
  output logic               g1,
  output logic               r2,
  output logic               g2,
  output state_t             state,
  output logic [COUNT_W-1:0] count
);

  state_t             next_state;
  logic [COUNT_W-1:0] next_count;

  tfsm_state_reg #(.COUNT_W(COUNT_W)) u_reg (
    .clk        (clk),
    .reset      (reset),
    .next_state (next_state),
    .next_count (next_count),
    .state      (state),
    .count      (count)
  );

  tfsm_next_state #(
    .COUNT_W (COUNT_W),
    .TO1     (TO1),
    .TO2     (TO2),
    .TO3     (TO3),
    .TO6     (TO6),
    .A5_C1   (A5_C1),
    .A5_C2   (A5_C2)
  ) u_next (
    .state      (state),
    .count      (count),
    .onn        (onn),
    .st         (st),
    .btn        (btn),
    .next_state (next_state),
    .next_count (next_count)
  );

  tfsm_outputs #(
    .COUNT_W (COUNT_W),
    .TD_G2   (TD_G2)
  ) u_out (
    .state (state),
    .count (count),
    .r1    (r1),
    .ygr   (ygr),
    .yrg   (yrg),
    .g1    (g1),
    .r2    (r2),
    .g2    (g2)
  );

  // A signal head never shows red and green together.
  a_road_exclusive : assert property (@(posedge clk) disable iff (reset) !(r1 && g1));
  a_walk_exclusive : assert property (@(posedge clk) disable iff (reset) !(r2 && g2));
  // The counter never passes the longest timeout.
  a_count_bound : assert property (@(posedge clk) disable iff (reset)
                                   32'(count) < TO1 + TO2 + TO3 + TO6);

endmodule
