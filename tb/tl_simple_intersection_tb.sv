// tl_simple_intersection_tb: self-checking test of the complete fixed-time
// intersection, with the 10 Hz divide ratio shortened to 8 board cycles.
//
// Watches the lamps only and measures, in board cycles, how long each state
// lasts: NS green 12 ticks, NS yellow 3, all red 3, EW green 7, EW yellow 3,
// all red 3 (a tick being one period of the controller clock, here 8
// cycles), and checks the order of states, the lamp words of each and the
// controller clock period. Runs three full loops.
module tl_simple_intersection_tb;
  import tl_pkg::*;

  localparam int unsigned DIV = 8;

  logic      clk = 1'b0;
  logic      rst = 1'b1;
  lamp_t     ns, ew;
  tl_state_t state;
  logic      rate_clk;
  int        checks = 0, failures = 0;
  int        loops = 0;

  //                            S0      S1      S2      S3      S4      S5
  localparam int TICKS[6]        = '{12,     3,      3,      7,      3,      3};
  localparam logic [2:0] NS_L[6] = '{3'b001, 3'b010, 3'b100, 3'b100, 3'b100, 3'b100};
  localparam logic [2:0] EW_L[6] = '{3'b100, 3'b100, 3'b100, 3'b001, 3'b010, 3'b100};

  tl_simple_intersection #(.RATE(RATE_10HZ), .DIV_0P1HZ(64), .DIV_1HZ(32),
                           .DIV_10HZ(DIV), .DIV_1KHZ(4)) dut (
    .clk_in(clk), .rst(rst), .ns(ns), .ew(ew), .state(state), .rate_clk(rate_clk)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int cur, dwell, rc_period, rc_last;
    logic rc_prev;
    bit   first;
    int   rises;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    check(state == ST_S2, "reset state is not all red");
    first = 1'b1; rises = 0;
    cur = 2; dwell = 0; rc_last = -1; rc_prev = 1'b0;
    for (int cyc = 0; loops < 3 && cyc < 4000; cyc++) begin
      @(negedge clk);
      if (rate_clk && !rc_prev) begin
        // the divided clock also goes high right after reset, before its
        // first full period: measure from the second rise on
        rises++;
        if (rises > 2) check(cyc - rc_last == DIV, $sformatf("rate clock period %0d", cyc - rc_last));
        rc_last = cyc;
      end
      rc_prev = rate_clk;
      dwell++;
      if (int'(state) != cur) begin
        int expect_next;
        expect_next = (cur == 5) ? 0 : cur + 1;
        check(int'(state) == expect_next, $sformatf("state %0d after %0d", state, cur));
        // the first state after reset starts part-way through a tick
        if (!first)
          check(dwell == TICKS[cur] * DIV, $sformatf("state %0d lasted %0d cycles, expected %0d",
                                                     cur, dwell, TICKS[cur] * DIV));
        cur = int'(state);
        dwell = 0;
        first = 1'b0;
        if (cur == 0) loops++;
      end
      check(ns == lamp_t'(NS_L[cur]), $sformatf("state %0d ns %b", cur, ns));
      check(ew == lamp_t'(EW_L[cur]), $sformatf("state %0d ew %b", cur, ew));
    end
    check(loops == 3, $sformatf("only %0d loops", loops));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
