// tb_tfsm_state_reg -- self-checking test of the state/counter register.
//
// Checks that reset forces a1 and count 0 without waiting for a clock edge, that
// the registers hold through reset, and that after reset every rising edge loads
// next_state/next_count (random values, 2000 cycles), with outputs unchanged
// between edges.
module tb_tfsm_state_reg;
  import tfsm_pkg::*;
  localparam int unsigned CW = COUNT_W_DEF;

  logic          clk = 1'b0;
  logic          reset;
  state_t        next_state, state;
  logic [CW-1:0] next_count, count;
  int            checks = 0;
  int            failures = 0;
  int            cycles = 0;

  tfsm_state_reg dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_regs(state_t s, logic [CW-1:0] c, string what);
    checks++;
    if (state !== s || count !== c) begin
      failures++;
      $display("%s: state=%s count=%0d, expected %s %0d", what, state.name(), count, s.name(), c);
    end
  endtask

  initial begin
    state_t        s_prev;
    logic [CW-1:0] c_prev;
    reset = 1'b0;
    next_state = A5; next_count = 6'd33;
    repeat (3) @(posedge clk);
    #2;
    expect_regs(A5, 6'd33, "load before reset");
    // Asynchronous reset: takes effect between clock edges.
    reset = 1'b1; #1;
    expect_regs(A1, '0, "async reset");
    repeat (2) @(posedge clk);
    #1 expect_regs(A1, '0, "held in reset");
    @(negedge clk) reset = 1'b0;
    repeat (2000) begin
      @(negedge clk);
      s_prev = state; c_prev = count;
      next_state = state_t'($urandom_range(0, 6));
      next_count = CW'($urandom);
      #2 expect_regs(s_prev, c_prev, "hold between edges");
      @(posedge clk); #1;
      expect_regs(next_state, next_count, "load on edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
