// tfsm_state_reg -- sequential part of the two-process timed Moore FSM.
//
// Holds the state register and the single cycle counter of the timed FSM. On each
// rising clock edge both take the values the combinational part computed
// (next_state, next_count). The reset is asynchronous and active high, and puts
// the FSM into a1 with the counter at 0, as in the source design. Keeping the
// counter in the same process as the state (rather than in a separate counter
// process) is the template the source proposes.
//
// Timing: state and count change one cycle after next_state/next_count are
// presented; reset acts immediately.
module tfsm_state_reg
  import tfsm_pkg::*;
#(
  parameter int unsigned COUNT_W = tfsm_pkg::COUNT_W_DEF
) (
  input  logic               clk,
  input  logic               reset,      // asynchronous, active high
  input  state_t             next_state,
  input  logic [COUNT_W-1:0] next_count,
  output state_t             state,
  output logic [COUNT_W-1:0] count
);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state <= A1;
      count <= '0;
    end else begin
      state <= next_state;
      count <= next_count;
    end
  end

endmodule
