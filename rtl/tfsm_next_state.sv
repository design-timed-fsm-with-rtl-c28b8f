// tfsm_next_state -- transition and counting function of the timed traffic-light
// controller (the combinational process of the two-process template).
//
// Every state has a timeout. While it runs the FSM loops on its own state and
// increments the counter; when it has expired the inputs are interrogated and the
// FSM moves on with the counter back at 0. The rules, taken from the controller's
// temporal state diagram:
//
//   a1 (TO1): Onn=0 -> a1 (wait), St&Onn -> a2 (day), !St&Onn -> a7 (night)
//   a7 (TO1): -> a1          (a1/a7 alternate: flashing yellow at night)
//   a2 (TO2): St&Onn -> a3, otherwise -> a1
//   a3 (TO3): St&Onn -> a4, otherwise -> a1
//   a4 (TO2): St&Onn -> a5, otherwise -> a1
//   a5 (TO3): Btn inside the window [C1,C2] -> a6 at once (event, takes
//             priority over the timeout); after the timeout Onn=0 or St=0 -> a1,
//             otherwise -> a2
//   a6 (TO6): -> a4
//   unused code: -> a1 with the counter cleared
//
// Onn and St are actions (sampled only when a timeout expires); Btn is an event
// (acted on in any cycle of a5 inside its window, ignored elsewhere). One
// timed_state_cmp instance, fed with the current state's timeout, makes the
// counter comparisons. Purely combinational.
module tfsm_next_state
  import tfsm_pkg::*;
#(
  parameter int unsigned COUNT_W = tfsm_pkg::COUNT_W_DEF,
  parameter int unsigned TO1     = tfsm_pkg::TO1_DEF,
  parameter int unsigned TO2     = tfsm_pkg::TO2_DEF,
  parameter int unsigned TO3     = tfsm_pkg::TO3_DEF,
  parameter int unsigned TO6     = tfsm_pkg::TO6_DEF,
  parameter int unsigned A5_C1   = tfsm_pkg::A5_C1_DEF,
  parameter int unsigned A5_C2   = tfsm_pkg::A5_C2_DEF
) (
  input  state_t             state,
  input  logic [COUNT_W-1:0] count,
  input  logic               onn,        // controller on (action)
  input  logic               st,         // day cycle on (action)
  input  logic               btn,        // pedestrian button (event)
  output state_t             next_state,
  output logic [COUNT_W-1:0] next_count
);

  logic [COUNT_W-1:0] to_cur;
  logic               timeout_done;
  logic               in_window;
  logic               unused_delay;

  // Timeout of the current state.
  always_comb begin
    unique case (state)
      A1, A7:  to_cur = COUNT_W'(TO1);
      A2, A4:  to_cur = COUNT_W'(TO2);
      A3, A5:  to_cur = COUNT_W'(TO3);
      A6:      to_cur = COUNT_W'(TO6);
      default: to_cur = COUNT_W'(TO1);
    endcase
  end

  timed_state_cmp #(.W(COUNT_W)) u_cmp (
    .count        (count),
    .to           (to_cur),
    .c1           (COUNT_W'(A5_C1)),
    .c2           (COUNT_W'(A5_C2)),
    .d            ('0),
    .timeout_done (timeout_done),
    .in_window    (in_window),
    .delay_done   (unused_delay)
  );

  always_comb begin
    next_count = '0;
    next_state = A1;
    unique case (state)
      A1: begin
        if (!timeout_done) begin
          next_state = A1;
          next_count = count + 1'b1;
        end else if (!onn) next_state = A1;
        else if (st)       next_state = A2;
        else               next_state = A7;
      end
      A2: begin
        if (!timeout_done) begin
          next_state = A2;
          next_count = count + 1'b1;
        end else if (st && onn) next_state = A3;
        else                    next_state = A1;
      end
      A3: begin
        if (!timeout_done) begin
          next_state = A3;
          next_count = count + 1'b1;
        end else if (st && onn) next_state = A4;
        else                    next_state = A1;
      end
      A4: begin
        if (!timeout_done) begin
          next_state = A4;
          next_count = count + 1'b1;
        end else if (st && onn) next_state = A5;
        else                    next_state = A1;
      end
      A5: begin
        if (btn && in_window) next_state = A6;
        else if (!timeout_done) begin
          next_state = A5;
          next_count = count + 1'b1;
        end else if (!onn) next_state = A1;
        else if (!st)      next_state = A1;
        else               next_state = A2;
      end
      A6: begin
        if (!timeout_done) begin
          next_state = A6;
          next_count = count + 1'b1;
        end else next_state = A4;
      end
      A7: begin
        if (!timeout_done) begin
          next_state = A7;
          next_count = count + 1'b1;
        end else next_state = A1;
      end
      default: begin
        next_state = A1;
        next_count = '0;
      end
    endcase
  end

endmodule
