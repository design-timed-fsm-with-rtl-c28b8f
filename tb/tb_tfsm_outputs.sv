// tb_tfsm_outputs -- self-checking test of the lamp decoder.
//
// Applies every state code and counter value and compares the six lamp outputs
// with the lamp table of the controller (a6: crossing turns from red to green
// once TD_G2 cycles have passed). Also checks that no signal head shows red and
// green together.
module tb_tfsm_outputs;
  import tfsm_pkg::*;
  localparam int unsigned CW = COUNT_W_DEF;

  logic          clk = 1'b0;
  state_t        state;
  logic [CW-1:0] count;
  logic          r1, ygr, yrg, g1, r2, g2;
  int            checks = 0;
  int            failures = 0;
  int            cycles = 0;

  tfsm_outputs dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] exp;  // {r1, ygr, yrg, g1, r2, g2}
    @(posedge clk);
    for (int s = 0; s < 8; s++)
      for (int c = 0; c < (1 << CW); c++) begin
        state = state_t'(s[2:0]);
        count = CW'(c);
        #1;
        case (s)
          0: exp = 6'b000000;
          1: exp = 6'b110010;
          2: exp = 6'b100001;
          3: exp = 6'b101010;
          4: exp = 6'b000110;
          5: exp = (c < int'(TD_G2_DEF)) ? 6'b100010 : 6'b100001;
          6: exp = 6'b010000;
          default: exp = 6'b000000;
        endcase
        checks++;
        if ({r1, ygr, yrg, g1, r2, g2} !== exp) begin
          failures++;
          if (failures < 10)
            $display("mismatch s=%0d count=%0d: got %b exp %b", s, c,
                     {r1, ygr, yrg, g1, r2, g2}, exp);
        end
        checks++;
        if ((r1 && g1) || (r2 && g2)) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
