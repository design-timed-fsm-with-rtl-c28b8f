// tb_timed_state_cmp -- self-checking test of the timed-state comparator.
//
// Sweeps every counter value against directed limits (timeout 1, 8, 45, 63; the
// window [2,5] and [5,40]; delays 0, 2, 7) and then checks 20000 random
// combinations. The expected flags are computed with signed integer arithmetic
// from the definitions "leave when count >= TO-1", "accept when
// c1-1 <= count < c2" and "output on when count >= d".
module tb_timed_state_cmp;
  localparam int unsigned W = 6;

  logic         clk = 1'b0;
  logic [W-1:0] count, to, c1, c2, d;
  logic         timeout_done, in_window, delay_done;
  int           checks = 0;
  int           failures = 0;
  int           cycles = 0;

  timed_state_cmp dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    int ci, ti, c1i, c2i, di;
    bit exp_to, exp_win, exp_d;
    #1;
    ci = int'(count); ti = int'(to); c1i = int'(c1); c2i = int'(c2); di = int'(d);
    exp_to  = ci >= ti - 1;
    exp_win = (ci >= c1i - 1) && (ci < c2i);
    exp_d   = ci >= di;
    checks++;
    if ({timeout_done, in_window, delay_done} !== {exp_to, exp_win, exp_d}) begin
      failures++;
      if (failures < 10)
        $display("mismatch count=%0d to=%0d c1=%0d c2=%0d d=%0d: got %b%b%b exp %b%b%b",
                 ci, ti, c1i, c2i, di, timeout_done, in_window, delay_done,
                 exp_to, exp_win, exp_d);
    end
  endtask

  initial begin
    int tos[4] = '{1, 8, 45, 63};
    int ds[3]  = '{0, 2, 7};
    int winl[2] = '{2, 5};
    int winh[2] = '{5, 40};
    @(posedge clk);
    foreach (tos[i]) foreach (ds[j]) foreach (winl[k])
      for (int n = 0; n < (1 << W); n++) begin
        count = W'(n); to = W'(tos[i]); d = W'(ds[j]); c1 = W'(winl[k]); c2 = W'(winh[k]);
        check_now();
      end
    // Spot checks of the template's worked examples: TO=8 leaves at count 7,
    // window [2,5] opens at count 1 and closes after count 4, d=2 is on at count 2.
    count = 6; to = 8; c1 = 2; c2 = 5; d = 2; #1;
    checks++; if (timeout_done !== 1'b0) failures++;
    count = 7; #1;
    checks++; if (timeout_done !== 1'b1) failures++;
    count = 0; #1;
    checks++; if (in_window !== 1'b0 || delay_done !== 1'b0) failures++;
    count = 1; #1;
    checks++; if (in_window !== 1'b1 || delay_done !== 1'b0) failures++;
    count = 4; #1;
    checks++; if (in_window !== 1'b1 || delay_done !== 1'b1) failures++;
    count = 5; #1;
    checks++; if (in_window !== 1'b0) failures++;
    repeat (20000) begin
      @(posedge clk);
      {count, to, c1, c2, d} = (5*W)'({$urandom, $urandom});
      check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
