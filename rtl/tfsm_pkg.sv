// tfsm_pkg -- types and timing constants shared by the timed Moore traffic-light
// controller.
//
// The controller is a Moore FSM with one timed variable: a single cycle counter
// that restarts at 0 on every change of state. All timing parameters below are
// counted in controller clock cycles. The state codes a1=000 ... a7=110 are the
// encoding the original design reports after synthesis; code 111 is unused and
// leads back to a1.
//
// Values taken from the original design: counter width 6, timeout of a1/a7 = 1,
// timeout of a3/a5 = 45, upper bound of the Btn window in a5 = 40, time spent in
// a6 = 20 cycles. The timeout of a2/a4 (6), the lower bound of the Btn window (5)
// and the G2 output delay in a6 (2) are this implementation's choices; the source
// gives no number for them.
package tfsm_pkg;

  // Width of the cycle counter ("count_length").
  localparam int unsigned COUNT_W_DEF = 6;

  // Timeouts t_io per state, in cycles.
  localparam int unsigned TO1_DEF = 1;   // a1 (power-on / idle) and a7 (night yellow)
  localparam int unsigned TO2_DEF = 6;   // a2, a4 (yellow on change)   -- chosen here
  localparam int unsigned TO3_DEF = 45;  // a3, a5 (green phases)
  localparam int unsigned TO6_DEF = 20;  // a6 (pedestrian request served)

  // Window t_c = [c1, c2] in a5 during which the Btn event is accepted.
  localparam int unsigned A5_C1_DEF = 5;   // chosen here
  localparam int unsigned A5_C2_DEF = 40;

  // Output delay t_d of G2 (and of R2 turning off) in a6.
  localparam int unsigned TD_G2_DEF = 2;   // chosen here

  typedef enum logic [2:0] {
    A1 = 3'b000,  // controller on, all lamps off (night mode base state)
    A2 = 3'b001,  // yellow G->R on the road: YGR, R1, R2
    A3 = 3'b010,  // road red, crossing green: R1, G2
    A4 = 3'b011,  // yellow R->G on the road: YRG, R1, R2
    A5 = 3'b100,  // road green, crossing red: G1, R2; Btn window open
    A6 = 3'b101,  // Btn served: R1, R2 then G2 after t_d
    A7 = 3'b110   // night mode: yellow only
  } state_t;

endpackage
