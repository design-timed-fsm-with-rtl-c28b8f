// tfsm_outputs -- output function of the timed traffic-light controller.
//
// Moore outputs decoded from the state, except in a6 where they also depend on
// the cycle counter to realise an output delay: on entering a6 (Btn served) the
// road turns red at once while the crossing stays red for TD_G2 more cycles, then
// G2 turns on and R2 off (count >= TD_G2, made by a timed_state_cmp instance).
//
//   state  R1 YGR YRG G1 R2 G2
//   a1      .   .   .  .  .  .
//   a2      1   1   .  .  1  .
//   a3      1   .   .  .  .  1
//   a4      1   .   1  .  1  .
//   a5      .   .   .  1  1  .
//   a6      1   .   .  .  *  *    R2 = count < TD_G2, G2 = count >= TD_G2
//   a7      .   1   .  .  .  .
//
// No lamp ever shows red and green together on the same signal head. Purely
// combinational: outputs follow state/count in the same cycle. The lamp table is
// the original design's; the delay value TD_G2 = 2 is this design's choice.
module tfsm_outputs
  import tfsm_pkg::*;
#(
  parameter int unsigned COUNT_W = tfsm_pkg::COUNT_W_DEF,
  parameter int unsigned TD_G2   = tfsm_pkg::TD_G2_DEF
) (
  input  state_t             state,
  input  logic [COUNT_W-1:0] count,
  output logic               r1,   // road red
  output logic               ygr,  // road yellow, green -> red (also night yellow)
  output logic               yrg,  // road yellow, red -> green
  output logic               g1,   // road green
  output logic               r2,   // crossing red
  output logic               g2    // crossing green
);

  logic g2_delay_done;
  logic unused_timeout;
  logic unused_window;

  timed_state_cmp #(.W(COUNT_W)) u_cmp (
    .count        (count),
    .to           ('0),
    .c1           ('0),
    .c2           ('0),
    .d            (COUNT_W'(TD_G2)),
    .timeout_done (unused_timeout),
    .in_window    (unused_window),
    .delay_done   (g2_delay_done)
  );

  always_comb begin
    g1  = (state == A5);
    ygr = (state == A2) || (state == A7);
    yrg = (state == A4);
    r1  = (state == A2) || (state == A3) || (state == A4) || (state == A6);
    g2  = (state == A3) || ((state == A6) && g2_delay_done);
    r2  = (state == A2) || (state == A4) || (state == A5) ||
          ((state == A6) && !g2_delay_done);
  end

endmodule
