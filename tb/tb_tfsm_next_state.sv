// tb_tfsm_next_state -- self-checking test of the transition/counting function.
//
// Applies every state code (including the unused one), every counter value and
// every combination of Onn, St and Btn, and compares next_state and next_count
// with a reference written from the controller's state diagram. The reference
// counts cycles 1-based (k = count+1): a state is left in its TO-th cycle, and
// the Btn window [c1,c2] covers cycles c1..c2 of a5.
module tb_tfsm_next_state;
  import tfsm_pkg::*;
  localparam int unsigned CW = COUNT_W_DEF;

  logic          clk = 1'b0;
  state_t        state, next_state;
  logic [CW-1:0] count, next_count;
  logic          onn, st, btn;
  int            checks = 0;
  int            failures = 0;
  int            cycles = 0;

  tfsm_next_state dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int timeout_of(logic [2:0] s);
    case (s)
      3'b000, 3'b110: return int'(TO1_DEF);
      3'b001, 3'b011: return int'(TO2_DEF);
      3'b010, 3'b100: return int'(TO3_DEF);
      3'b101:         return int'(TO6_DEF);
      default:        return 0;
    endcase
  endfunction

  // Returns {state code, count}.
  function automatic logic [3+CW-1:0] reference(logic [2:0] s, int c, bit on, bit start, bit b);
    int  k = c + 1;
    bit  last = k >= timeout_of(s);
    bit  day = on && start;
    if (s == 3'b111) return '0;
    if (s == 3'b100 && b && k >= int'(A5_C1_DEF) && k <= int'(A5_C2_DEF))
      return {3'b101, CW'(0)};
    if (!last) return {s, CW'(c + 1)};
    case (s)
      3'b000:  return {(!on ? 3'b000 : (start ? 3'b001 : 3'b110)), CW'(0)};
      3'b001:  return {(day ? 3'b010 : 3'b000), CW'(0)};
      3'b010:  return {(day ? 3'b011 : 3'b000), CW'(0)};
      3'b011:  return {(day ? 3'b100 : 3'b000), CW'(0)};
      3'b100:  return {(day ? 3'b001 : 3'b000), CW'(0)};
      3'b101:  return {3'b011, CW'(0)};
      default: return {3'b000, CW'(0)};
    endcase
  endfunction

  int n_window_hits = 0;

  initial begin
    logic [3+CW-1:0] exp;
    @(posedge clk);
    for (int s = 0; s < 8; s++)
      for (int c = 0; c < (1 << CW); c++)
        for (int i = 0; i < 8; i++) begin
          state = state_t'(s[2:0]);
          count = CW'(c);
          {onn, st, btn} = i[2:0];
          #1;
          exp = reference(s[2:0], c, onn, st, btn);
          checks++;
          if (s == 4 && btn && exp[3+CW-1:CW] == 3'b101) n_window_hits++;
          if ({next_state, next_count} !== exp) begin
            failures++;
            if (failures < 10)
              $display("mismatch s=%0d count=%0d onn=%b st=%b btn=%b: got %0d/%0d exp %0d/%0d",
                       s, c, onn, st, btn, next_state, next_count,
                       exp[3+CW-1:CW], exp[CW-1:0]);
          end
        end
    // The window [5,40] must cover exactly counts 4..39 of a5 (4 input combinations each).
    checks++;
    if (n_window_hits != 4 * (int'(A5_C2_DEF) - int'(A5_C1_DEF) + 1)) begin
      failures++;
      $display("window width %0d", n_window_hits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
