// traffic_top_full_tb: both controllers at full size, off a 50 MHz board
// clock with the 10 Hz controller rate (5,000,000 board cycles per tick).
//
// A car waits on the west sensor from the start. The test follows the
// fixed-time controller through one complete loop (all red, EW green,
// EW yellow, all red, NS green, NS yellow, back to all red) and the sensed
// controller from start-up through one served car, and checks the state
// order, the lamp words and the duration of each state in board cycles:
// 3 ticks for yellow and all-red, 7 for side-road green, 12 for main-road
// green (fixed-time) and for confirming a car (sensed), i.e. 0.3 s, 0.7 s
// and 1.2 s at 10 Hz.
module traffic_top_full_tb;
  import tl_pkg::*;

  localparam longint TICK = 5_000_000;  // board cycles per 10 Hz tick
  localparam longint PERIOD = 20;        // 50 MHz: 20 ns with a 1 ns time unit

  logic      clk = 1'b0;
  logic      rst = 1'b1;
  logic      sens_w = 1'b0, sens_e = 1'b0;
  lamp_t     simple_ns, simple_ew, sensed_ns, sensed_ew;
  tl_state_t simple_state, sensed_state;
  logic      simple_rate_clk, sensed_rate_clk;
  int        checks = 0, failures = 0;

  traffic_top dut (
    .clk_in(clk), .rst(rst), .sens_w(sens_w), .sens_e(sens_e),
    .simple_ns(simple_ns), .simple_ew(simple_ew), .simple_state(simple_state),
    .simple_rate_clk(simple_rate_clk),
    .sensed_ns(sensed_ns), .sensed_ew(sensed_ew), .sensed_state(sensed_state),
    .sensed_rate_clk(sensed_rate_clk)
  );

  always #(PERIOD / 2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  //                              S0      S1      S2      S3      S4      S5      SS
  localparam int TICKS[7]        = '{12,     3,      3,      7,      3,      3,      12};
  localparam logic [2:0] NS_L[7] = '{3'b001, 3'b010, 3'b100, 3'b100, 3'b100, 3'b100, 3'b001};
  localparam logic [2:0] EW_L[7] = '{3'b100, 3'b100, 3'b100, 3'b001, 3'b010, 3'b100, 3'b100};

  // expected order of states after reset
  localparam int A_SEQ[7] = '{2, 3, 4, 5, 0, 1, 2};
  localparam int B_SEQ[8] = '{2, 3, 4, 5, 0, 6, 1, 2};

  bit a_done = 1'b0, b_done = 1'b0;

  task automatic follow(input bit is_simple, input int nseq);
    int  idx;
    time t_enter;
    int  cur, nxt;
    idx = 0;
    t_enter = $time;
    cur = is_simple ? int'(simple_state) : int'(sensed_state);
    check(cur == (is_simple ? A_SEQ[0] : B_SEQ[0]), "reset state");
    while (idx < nseq - 1) begin
      if (is_simple) @(simple_state); else @(sensed_state);
      @(negedge clk);
      nxt = is_simple ? int'(simple_state) : int'(sensed_state);
      check(nxt == (is_simple ? A_SEQ[idx + 1] : B_SEQ[idx + 1]),
            $sformatf("%s: state %0d after %0d", is_simple ? "simple" : "sensed", nxt, cur));
      // the first state after reset starts part-way through a tick, and
      // S0 of the sensed controller lasts until a car is sensed
      if (idx > 0 && !(!is_simple && cur == 0))
        check(($time - t_enter) / PERIOD == TICKS[cur] * TICK,
              $sformatf("%s: state %0d lasted %0d cycles, expected %0d",
                        is_simple ? "simple" : "sensed", cur, ($time - t_enter) / PERIOD,
                        TICKS[cur] * TICK));
      if (is_simple)
        check(simple_ns == lamp_t'(NS_L[nxt]) && simple_ew == lamp_t'(EW_L[nxt]), "simple lamps");
      else
        check(sensed_ns == lamp_t'(NS_L[nxt]) && sensed_ew == lamp_t'(EW_L[nxt]), "sensed lamps");
      $display("%0t %s: S%0d -> %0d", $time, is_simple ? "simple" : "sensed", cur, nxt);
      t_enter = $time;
      cur = nxt;
      idx++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    sens_w = 1'b1;
    fork
      begin follow(1'b1, 7); a_done = 1'b1; end
      begin follow(1'b0, 8); b_done = 1'b1; end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog: 40 ticks
  initial begin
    repeat (int'(40 * TICK)) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
