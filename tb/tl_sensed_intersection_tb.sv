// tl_sensed_intersection_tb: self-checking test of the complete
// sensor-driven intersection, with the 10 Hz divide ratio shortened to 6
// board cycles.
//
// Directed scenarios, each checked on the lamps and the state:
//   1. no car: the main road stays green for 60 ticks;
//   2. a car on the west sensor that leaves after 5 ticks: the controller
//      confirms (SS) and falls back to S0 without serving the side road;
//   3. a car on the east sensor that stays: served after the 12-tick
//      confirmation, through yellow, all red, side green, yellow, all red;
//   4. a car on the west sensor held throughout: served again straight away.
// A monitor measures the dwell of every state in board cycles against the
// light plan (S1 3, S2 3, S3 7, S4 3, S5 3 ticks, SS 12 ticks when served)
// and checks that one road is always red.
module tl_sensed_intersection_tb;
  import tl_pkg::*;

  localparam int unsigned DIV = 6;

  logic      clk = 1'b0;
  logic      rst = 1'b1;
  logic      sens_w = 1'b0, sens_e = 1'b0;
  lamp_t     ns, ew;
  tl_state_t state;
  logic      rate_clk;
  int        checks = 0, failures = 0;
  int        n_serve = 0, n_cancel = 0;

  //                              S0      S1      S2      S3      S4      S5      SS
  localparam int TICKS[7]        = '{0,      3,      3,      7,      3,      3,      12};
  localparam logic [2:0] NS_L[7] = '{3'b001, 3'b010, 3'b100, 3'b100, 3'b100, 3'b100, 3'b001};
  localparam logic [2:0] EW_L[7] = '{3'b100, 3'b100, 3'b100, 3'b001, 3'b010, 3'b100, 3'b100};

  tl_sensed_intersection #(.RATE(RATE_10HZ), .DIV_0P1HZ(64), .DIV_1HZ(32),
                           .DIV_10HZ(DIV), .DIV_1KHZ(4)) dut (
    .clk_in(clk), .rst(rst), .sens_w(sens_w), .sens_e(sens_e),
    .ns(ns), .ew(ew), .state(state), .rate_clk(rate_clk)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // monitor: lamps, order and dwell of states
  int  cur = 2, dwell = 0;
  bit  first = 1'b1;
  always @(negedge clk) if (!rst) begin
    dwell++;
    if (int'(state) != cur) begin
      case (cur)
        0: check(state == ST_SS, "S0 left for a state other than SS");
        6: check(state == ST_S0 || state == ST_S1, "SS left for a wrong state");
        5: check(state == ST_S0, "S5 not followed by S0");
        default: check(int'(state) == cur + 1, $sformatf("S%0d followed by %0d", cur, state));
      endcase
      if (!first && cur != 0 && !(cur == 6 && state == ST_S0))
        check(dwell == TICKS[cur] * DIV, $sformatf("state %0d lasted %0d cycles, expected %0d",
                                                   cur, dwell, TICKS[cur] * DIV));
      if (cur == 6 && state == ST_S1) n_serve++;
      if (cur == 6 && state == ST_S0) n_cancel++;
      cur = int'(state);
      dwell = 0;
      first = 1'b0;
    end
    check(ns == lamp_t'(NS_L[cur]) && ew == lamp_t'(EW_L[cur]),
          $sformatf("state %0d lamps ns %b ew %b", cur, ns, ew));
    check(ns == LAMP_RED || ew == LAMP_RED, "both roads open");
  end

  task automatic wait_ticks(input int n);
    repeat (n * DIV) @(negedge clk);
  endtask

  initial begin
    int serve0, cancel0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // from reset (all red) the controller finishes the side-road phase
    wait_ticks(25);
    check(state == ST_S0, "not resting on main-road green after start-up");
    // 1. nobody waiting
    for (int i = 0; i < 60; i++) begin
      wait_ticks(1);
      check(state == ST_S0, "main road left green with no car");
    end
    // 2. car leaves before being served
    cancel0 = n_cancel; serve0 = n_serve;
    sens_w = 1'b1;
    wait_ticks(5);
    check(state == ST_SS, "west car not seen");
    sens_w = 1'b0;
    wait_ticks(3);
    check(state == ST_S0, "did not fall back to S0 after the car left");
    check(n_cancel == cancel0 + 1 && n_serve == serve0, "cancel not counted once");
    // 3. east car stays until the side road is green
    sens_e = 1'b1;
    wait_ticks(14);
    check(state == ST_S1, "east car not served after confirmation");
    wait_ticks(6);
    check(state == ST_S3, "side road not green");
    sens_e = 1'b0;
    wait_ticks(20);
    check(state == ST_S0, "not back to main-road green");
    check(n_serve == serve0 + 1, "serve not counted");
    // 4. west car held: served, and the controller comes straight back to SS
    sens_w = 1'b1;
    wait_ticks(2 + 12 + 3 + 3 + 7 + 3 + 3 + 2);
    check(state == ST_SS, "held car not confirmed again");
    wait_ticks(12);
    sens_w = 1'b0;
    wait_ticks(30);
    check(n_serve == serve0 + 3, $sformatf("serves %0d, expected %0d", n_serve, serve0 + 3));
    check(state == ST_S0, "not resting at the end");
    $display("serve=%0d cancel=%0d", n_serve, n_cancel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
