// tb_day_cycle_trace -- directed replay of a reference day-cycle trace of the
// traffic-light controller at its default timing.
//
// With Onn and St high from the start, the controller must pass through
// a1 a2 a3 a4 a5 a2 a3 a4 a5 a6 a4. Btn is pressed three times: in the first a3
// and in the second a2 (both ignored, Btn is only an event in a5), and in the
// second a5 at counter value 38 (accepted: the next cycle is a6 with count 0).
// The test then checks the a6 sequence of the reference trace: the counter
// runs 0..19, R1 is on throughout, the crossing stays red for counter values 0
// and 1 and is green from 2 on, and a4 follows with the counter back at 0. The
// length of every visit is checked against its timeout.
module tb_day_cycle_trace;
  import tfsm_pkg::*;
  localparam int unsigned CW = COUNT_W_DEF;

  logic          clk = 1'b0;
  logic          reset, onn, st, btn;
  logic          r1, ygr, yrg, g1, r2, g2;
  state_t        state;
  logic [CW-1:0] count;

  traffic_light_fsm dut (.*);

  always #50 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("cycle %0d: %s (state %s count %0d)", cycles, what, state.name(), count);
    end
  endtask

  // Expected visits: state and number of cycles spent in it.
  state_t exp_s[11] = '{A1, A2, A3, A4, A5, A2, A3, A4, A5, A6, A4};
  int     exp_n[11];

  initial begin
    int visit = 0, len = 0, a2_seen = 0, a3_seen = 0, a5_seen = 0, n_btn = 0;
    state_t prev;
    exp_n = '{int'(TO1_DEF), int'(TO2_DEF), int'(TO3_DEF), int'(TO2_DEF), int'(TO3_DEF),
              int'(TO2_DEF), int'(TO3_DEF), int'(TO2_DEF), 39, int'(TO6_DEF), int'(TO2_DEF)};
    reset = 1'b1; onn = 1'b1; st = 1'b1; btn = 1'b0;
    @(negedge clk); @(negedge clk);
    reset = 1'b0;
    prev = state; len = 0;
    while (visit < 11) begin
      // Btn stimulus, applied in the low phase before the sampling edge.
      btn = 1'b0;
      if (state == A3 && a3_seen == 1 && count == 10) btn = 1'b1;
      if (state == A2 && a2_seen == 2 && count == 2)  btn = 1'b1;
      if (state == A5 && a5_seen == 2 && count == 38) btn = 1'b1;
      if (btn) n_btn++;
      // a6: delayed crossing green.
      if (state == A6) begin
        expect_true(r1 && !g1 && !ygr && !yrg, "a6 road lamps");
        if (count < 2) expect_true(r2 && !g2, "a6 crossing still red");
        else           expect_true(!r2 && g2, "a6 crossing green");
      end
      @(negedge clk);
      len++;
      if (state != prev || count == 0) begin
        expect_true(prev == exp_s[visit], $sformatf("visit %0d is %s", visit, prev.name()));
        expect_true(len == exp_n[visit],
                    $sformatf("visit %0d (%s) lasted %0d cycles", visit, prev.name(), len));
        if (prev == A6) expect_true(state == A4 && count == 0, "a4 follows a6");
        visit++;
        len = 0;
        if (state == A2) a2_seen++;
        if (state == A3) a3_seen++;
        if (state == A5) a5_seen++;
      end
      prev = state;
    end
    // The last a4 hands over to a third a5.
    expect_true(a5_seen == 3 && a3_seen == 2 && a2_seen == 2, "visit counts");
    expect_true(n_btn == 3, "three Btn presses applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
