// tb_traffic_light_fsm -- end-to-end test of the traffic-light controller at its
// default timing (the full-size configuration).
//
// A cycle-accurate reference model runs beside the controller: it tracks the
// state and the number k (1-based) of the current cycle in that state, leaves a
// state in its TO-th cycle, takes Btn in a5 in cycles A5_C1..A5_C2 only, and
// derives the lamps from the state table. State, counter and all six lamps are
// compared every cycle.
//
// The stimulus walks through: Onn off (controller idles in a1), night mode
// (a1/a7 flashing yellow), the day cycle without requests, Btn too early, too late
// and outside a5 (all ignored), Btn inside the window (a6 with delayed crossing
// green, then back to a4), St or Onn dropped in each day state (return to a1),
// an asynchronous reset in the middle of operation, and finally a long random
// phase. Each mechanism is counted and a failure is recorded for any that never
// happened. The time spent in every completed state visit is also checked
// against that state's timeout.
module tb_traffic_light_fsm;
  import tfsm_pkg::*;
  localparam int unsigned CW  = COUNT_W_DEF;
  localparam int          TO1 = int'(TO1_DEF);
  localparam int          TO2 = int'(TO2_DEF);
  localparam int          TO3 = int'(TO3_DEF);
  localparam int          TO6 = int'(TO6_DEF);
  localparam int          C1  = int'(A5_C1_DEF);
  localparam int          C2  = int'(A5_C2_DEF);
  localparam int          TD  = int'(TD_G2_DEF);

  logic          clk = 1'b0;
  logic          reset, onn, st, btn;
  logic          r1, ygr, yrg, g1, r2, g2;
  state_t        state;
  logic [CW-1:0] count;

  traffic_light_fsm dut (.*);

  always #50 clk = ~clk;   // 100 ns clock period

  int checks = 0;
  int failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 40000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  typedef enum int {S1 = 1, S2, S3, S4, S5, S6, S7} ref_state_t;
  ref_state_t m_state;
  int         m_k;      // current cycle in the state, 1-based

  // Mechanism counters.
  int n_timeout[8];
  int n_night_blink = 0, n_btn_taken = 0, n_btn_early = 0, n_btn_late = 0;
  int n_btn_elsewhere = 0, n_delay_wait = 0, n_delay_on = 0;
  int n_st_drop = 0, n_onn_drop = 0, n_idle = 0, n_reset = 0, n_day_rounds = 0;

  function automatic int to_of(ref_state_t s);
    case (s)
      S1, S7: return TO1;
      S2, S4: return TO2;
      S3, S5: return TO3;
      default: return TO6;
    endcase
  endfunction

  function automatic logic [5:0] lamps_of(ref_state_t s, int k);
    case (s)
      S1: return 6'b000000;
      S2: return 6'b110010;
      S3: return 6'b100001;
      S4: return 6'b101010;
      S5: return 6'b000110;
      S6: return (k > TD) ? 6'b100001 : 6'b100010;
      default: return 6'b010000;
    endcase
  endfunction

  // One clock step of the model with the inputs of the cycle that ends.
  task automatic model_step(bit on, bit start, bit b);
    ref_state_t nxt = m_state;
    bit         leave = 1'b0;
    if (m_state == S5 && b) begin
      if (m_k >= C1 && m_k <= C2) begin
        nxt = S6; leave = 1'b1; n_btn_taken++;
      end else if (m_k < C1) n_btn_early++;
      else n_btn_late++;
    end else if (b) n_btn_elsewhere++;
    if (m_state == S6) begin
      if (m_k > TD) n_delay_on++; else n_delay_wait++;
    end
    if (!leave && m_k >= to_of(m_state)) begin
      leave = 1'b1;
      n_timeout[m_state]++;
      case (m_state)
        S1: begin
          if (!on) begin n_idle++; nxt = S1; end
          else if (start) nxt = S2;
          else nxt = S7;
        end
        S7: begin nxt = S1; n_night_blink++; end
        S6: nxt = S4;
        default: begin
          if (on && start) begin
            case (m_state)
              S2: nxt = S3;
              S3: nxt = S4;
              S4: nxt = S5;
              default: begin nxt = S2; n_day_rounds++; end
            endcase
          end else begin
            nxt = S1;
            if (!on) n_onn_drop++; else n_st_drop++;
          end
        end
      endcase
    end
    if (leave) begin
      m_state = nxt; m_k = 1;
    end else m_k++;
  endtask

  // Duration of each state visit, measured on the DUT: a visit that ends by its
  // timeout (every exit except a5 -> a6 through Btn) lasts exactly TO cycles. A
  // new visit starts when the state changes or the counter restarts at 0.
  state_t d_prev;
  int     d_len = 0;
  bit     d_valid = 1'b0;

  always @(negedge clk or posedge reset) begin
    if (reset) begin
      d_valid <= 1'b0;
      d_len   <= 0;
    end else begin
      if (d_valid && (state != d_prev || count == 0)) begin
        if (!(d_prev == A5 && state == A6)) begin
          checks++;
          if (d_len != to_of(ref_state_t'(int'(d_prev) + 1))) begin
            failures++;
            $display("visit of %s lasted %0d cycles", d_prev.name(), d_len);
          end
        end
        d_len <= 1;
      end else d_len <= d_len + 1;
      d_valid <= 1'b1;
      d_prev  <= state;
    end
  end

  always @(posedge clk or posedge reset) begin
    if (reset) begin
      m_state <= S1; m_k <= 1;
    end else model_step(onn, st, btn);
  end

  // Compare every cycle, in the middle of the low phase.
  always @(negedge clk) if (!reset) begin
    checks++;
    if (int'(state) + 1 != int'(m_state) || int'(count) + 1 != m_k ||
        {r1, ygr, yrg, g1, r2, g2} != lamps_of(m_state, m_k)) begin
      failures++;
      if (failures < 20)
        $display("cycle %0d: dut %s/%0d lamps %b, model a%0d/k=%0d lamps %b", cycles,
                 state.name(), count, {r1, ygr, yrg, g1, r2, g2},
                 int'(m_state), m_k, lamps_of(m_state, m_k));
    end
  end

  // ---------------- stimulus ----------------
  task automatic run(int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic wait_state(state_t s, int cnt);
    int guard = 0;
    while (!(state == s && int'(count) == cnt) && guard < 2000) begin
      @(negedge clk); guard++;
    end
    checks++;
    if (guard >= 2000) begin
      failures++;
      $display("never reached %s with count %0d", s.name(), cnt);
    end
  endtask

  task automatic pulse_btn();
    btn = 1'b1; @(negedge clk); btn = 1'b0;
  endtask

  task automatic require(int n, string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end else $display("%-34s %0d", what, n);
  endtask

  initial begin
    reset = 1'b1; onn = 1'b0; st = 1'b0; btn = 1'b0;
    run(3);
    reset = 1'b0;
    // Off: stays in a1 with all lamps dark.
    run(10);
    // Night mode: yellow flashes (a1 <-> a7).
    onn = 1'b1;
    run(20);
    // Day cycle, two rounds without requests.
    st = 1'b1;
    run(2 * (2 * TO2 + 2 * TO3) + 10);
    // Btn outside a5, then too early and too late in a5: all ignored.
    wait_state(A3, 3);  pulse_btn();
    wait_state(A5, 0);  pulse_btn();
    wait_state(A5, C1 - 2); pulse_btn();
    wait_state(A5, C2);     pulse_btn();
    // Btn on the first and on the last cycle of the window.
    wait_state(A5, C1 - 1); pulse_btn();
    wait_state(A6, TO6 - 1);
    wait_state(A5, C2 - 1); pulse_btn();
    // Btn inside the window while Onn/St are low is still served.
    wait_state(A5, 20); st = 1'b0; pulse_btn(); st = 1'b1;
    // Drop St in each day state, then Onn in each day state.
    wait_state(A2, 1); st = 1'b0; run(TO2 + 2); st = 1'b1;
    wait_state(A3, 1); st = 1'b0; run(TO3 + 2); st = 1'b1;
    wait_state(A4, 1); st = 1'b0; run(TO2 + 2); st = 1'b1;
    wait_state(A5, 1); st = 1'b0; run(TO3 + 2); st = 1'b1;
    wait_state(A2, 1); onn = 1'b0; run(TO2 + 2); onn = 1'b1;
    wait_state(A3, 1); onn = 1'b0; run(TO3 + 2); onn = 1'b1;
    wait_state(A4, 1); onn = 1'b0; run(TO2 + 2); onn = 1'b1;
    wait_state(A5, 1); onn = 1'b0; run(TO3 + 2); onn = 1'b1;
    // Asynchronous reset in the middle of a6.
    wait_state(A5, 10); pulse_btn();
    wait_state(A6, 5);
    #20 reset = 1'b1; n_reset++;
    #10;
    checks++;
    if (state != A1 || count != 0 || r1 || g2) begin
      failures++;
      $display("asynchronous reset did not act at once");
    end
    @(negedge clk) reset = 1'b0;
    // Random operation: Btn often, St/Onn rarely dropped.
    repeat (20000) begin
      @(negedge clk);
      btn = ($urandom_range(0, 19) == 0);
      if ($urandom_range(0, 299) == 0) st  = ~st;
      if ($urandom_range(0, 599) == 0) onn = ~onn;
      if (!st && $urandom_range(0, 99) == 0) st = 1'b1;
      if (!onn && $urandom_range(0, 99) == 0) onn = 1'b1;
    end
    btn = 1'b0;
    run(5);

    require(n_idle,          "a1 held while Onn=0");
    require(n_night_blink,   "night blink a7 -> a1");
    require(n_timeout[S1],   "timeout a1");
    require(n_timeout[S2],   "timeout a2");
    require(n_timeout[S3],   "timeout a3");
    require(n_timeout[S4],   "timeout a4");
    require(n_timeout[S5],   "timeout a5");
    require(n_timeout[S6],   "timeout a6");
    require(n_timeout[S7],   "timeout a7");
    require(n_day_rounds,    "day cycle a5 -> a2");
    require(n_btn_taken,     "Btn accepted in window");
    require(n_btn_early,     "Btn ignored before window");
    require(n_btn_late,      "Btn ignored after window");
    require(n_btn_elsewhere, "Btn ignored outside a5");
    require(n_delay_wait,    "a6 output delay (G2 held off)");
    require(n_delay_on,      "a6 delayed G2 on");
    require(n_st_drop,       "St=0 -> a1");
    require(n_onn_drop,      "Onn=0 -> a1");
    require(n_reset,         "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
