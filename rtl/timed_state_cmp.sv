// timed_state_cmp -- the timing template of one state of a timed Moore FSM.
//
// A timed Moore FSM keeps one cycle counter `count` that is 0 in the first cycle
// spent in a state and counts up by one per cycle while the FSM stays there. The
// three timing parameters of a state are then plain comparisons on that counter:
//
//   timeout t_io = TO : the FSM stays while count < TO-1 and leaves (after
//                       interrogating its inputs) when count >= TO-1, so it spends
//                       exactly TO cycles in the state. timeout_done flags that.
//   window  t_c = [c1, c2] : an external event is accepted while
//                       count >= c1-1 and count < c2. in_window flags that.
//   output delay t_d = d : a delayed Moore output is on while count >= d, i.e.
//                       from the (d+1)-th cycle in the state. delay_done flags it.
//
// The "-1" comparisons are made as count+1 >= X in W+1 bits, so a bound of 0
// behaves like a bound of 1 instead of wrapping around. Purely combinational;
// the three limits are inputs so that one instance can serve several states.
module timed_state_cmp #(
  parameter int unsigned W = 6
) (
  input  logic [W-1:0] count,        // cycles spent in the current state, from 0
  input  logic [W-1:0] to,           // timeout TO of the state
  input  logic [W-1:0] c1,           // lower bound of the event window
  input  logic [W-1:0] c2,           // upper bound of the event window
  input  logic [W-1:0] d,            // output delay
  output logic         timeout_done, // count >= TO-1: last cycle of the state
  output logic         in_window,    // c1-1 <= count < c2: event may be taken
  output logic         delay_done    // count >= d: delayed output is on
);

  logic [W:0] count_p1;

  always_comb begin
    count_p1     = {1'b0, count} + (W+1)'(1);
    timeout_done = count_p1 >= {1'b0, to};
    in_window    = (count_p1 >= {1'b0, c1}) && (count < c2);
    delay_done   = count >= d;
  end

endmodule
