// traffic_top_tb: end-to-end test of both controllers in traffic_top, with
// the 10 Hz divide ratio shortened to 5 board cycles.
// Each controller's tick period is checked against that ratio.
//
// Side-road cars arrive on the west and east sensors at random and stay for
// a random number of controller ticks. A tick-level reference model of each
// controller (its own interval count and light plan) is stepped on every
// rising edge of that controller's divided clock, and the state and lamps
// of both controllers are compared with it every board cycle. The test
// counts each mechanism of the design and fails if one never happened:
// full loops of the fixed-time controller, rests on main-road green with no
// car, cars confirmed and served, cars that left before being served, cars
// served from the west sensor alone and from the east sensor alone, and the
// interval counter resting at its end value.
module traffic_top_tb;
  import tl_pkg::*;

  localparam int unsigned DIV = 5;

  logic      clk = 1'b0;
  logic      rst = 1'b1;
  logic      sens_w = 1'b0, sens_e = 1'b0;
  lamp_t     simple_ns, simple_ew, sensed_ns, sensed_ew;
  tl_state_t simple_state, sensed_state;
  logic      simple_rate_clk, sensed_rate_clk;
  int        checks = 0, failures = 0;

  int n_loop = 0, n_rest = 0, n_serve = 0, n_cancel = 0, n_west = 0, n_east = 0, n_sat = 0;

  traffic_top #(.RATE(RATE_10HZ), .DIV_0P1HZ(40), .DIV_1HZ(20), .DIV_10HZ(DIV), .DIV_1KHZ(3)) dut (
    .clk_in(clk), .rst(rst), .sens_w(sens_w), .sens_e(sens_e),
    .simple_ns(simple_ns), .simple_ew(simple_ew), .simple_state(simple_state),
    .simple_rate_clk(simple_rate_clk),
    .sensed_ns(sensed_ns), .sensed_ew(sensed_ew), .sensed_state(sensed_state),
    .sensed_rate_clk(sensed_rate_clk)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  localparam int S0 = 0, S1 = 1, S2 = 2, S3 = 3, S4 = 4, S5 = 5, SS = 6;
  //                                S0      S1      S2      S3      S4      S5      SS
  localparam logic [2:0] NS_L[7] = '{3'b001, 3'b010, 3'b100, 3'b100, 3'b100, 3'b100, 3'b001};
  localparam logic [2:0] EW_L[7] = '{3'b100, 3'b100, 3'b100, 3'b001, 3'b010, 3'b100, 3'b100};
  // ticks each timed state lasts: it is left when the interval count since
  // entry exceeds its limit
  localparam int LIMIT[7]        = '{10,     1,      1,      5,      1,      1,      10};

  // reference models
  int  a_st = S2, a_cnt = 0;   // fixed-time controller
  int  b_st = S2, b_cnt = 0;   // sensed controller

  function automatic void step_simple();
    bit go;
    go = a_cnt > LIMIT[a_st];
    if (go) begin
      a_st  = (a_st == S5) ? S0 : a_st + 1;
      a_cnt = 0;
      if (a_st == S0) n_loop++;
    end else if (a_cnt <= 10) a_cnt++;
  endfunction

  function automatic void step_sensed(bit w, bit e);
    bit car, clr;
    int nx;
    car = w | e;
    nx  = b_st;
    clr = 0;
    case (b_st)
      S0: if (car) begin nx = SS; clr = 1; end else n_rest++;
      SS: if (!car) begin nx = S0; n_cancel++; end
          else if (b_cnt > 10) begin
            nx = S1; clr = 1; n_serve++;
            if (w && !e) n_west++;
            if (e && !w) n_east++;
          end
      S5: if (b_cnt > LIMIT[S5]) begin nx = S0; clr = 1; end
      default: if (b_cnt > LIMIT[b_st]) begin nx = b_st + 1; clr = 1; end
    endcase
    if (b_cnt == 11) n_sat++;
    b_st = nx;
    if (clr) b_cnt = 0;
    else if (b_cnt <= 10) b_cnt++;
  endfunction

  initial begin
    logic a_prev, b_prev;
    int   a_rises, b_rises, car_left;
    int   a_last, b_last;
    bit   step_a, step_b, after_b;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    a_prev = 1'b0; b_prev = 1'b0; a_rises = 0; b_rises = 0; car_left = 0;
    after_b = 1'b0; a_last = -1; b_last = -1;
    for (int cyc = 0; cyc < 40000; cyc++) begin
      @(negedge clk);
      check(int'(simple_state) == a_st, $sformatf("cycle %0d simple state %0d, model %0d", cyc, simple_state, a_st));
      check(int'(sensed_state) == b_st, $sformatf("cycle %0d sensed state %0d, model %0d", cyc, sensed_state, b_st));
      check(simple_ns == lamp_t'(NS_L[a_st]) && simple_ew == lamp_t'(EW_L[a_st]), "simple lamps");
      check(sensed_ns == lamp_t'(NS_L[b_st]) && sensed_ew == lamp_t'(EW_L[b_st]), "sensed lamps");
      // a controller steps on the board edge after its divided clock rises;
      // the first rise right after reset is not a period boundary
      step_a = simple_rate_clk && !a_prev && a_rises++ > 0;
      step_b = sensed_rate_clk && !b_prev && b_rises++ > 0;
      // each controller clock must run at the selected rate
      if (step_a) begin
        if (a_last >= 0) check(cyc - a_last == DIV, $sformatf("simple tick period %0d", cyc - a_last));
        a_last = cyc;
      end
      if (step_b) begin
        if (b_last >= 0) check(cyc - b_last == DIV, $sformatf("sensed tick period %0d", cyc - b_last));
        b_last = cyc;
      end
      a_prev = simple_rate_clk;
      b_prev = sensed_rate_clk;
      if (step_a) step_simple();
      if (step_b) step_sensed(sens_w, sens_e);
      // sensors change only on the board cycle after a step, so they are
      // stable around every step
      if (after_b) begin
        if (car_left > 0) begin
          car_left--;
          if (car_left == 0) begin sens_w = 1'b0; sens_e = 1'b0; end
        end else if ($urandom_range(0, 11) == 0) begin
          case ($urandom_range(0, 2))
            0: sens_w = 1'b1;
            1: sens_e = 1'b1;
            default: begin sens_w = 1'b1; sens_e = 1'b1; end
          endcase
          // short stays leave before confirmation, long ones are served
          car_left = ($urandom_range(0, 1) != 0) ? $urandom_range(1, 8) : $urandom_range(14, 40);
        end
      end
      after_b = step_b;
    end
    $display("loops=%0d rest=%0d serve=%0d cancel=%0d west=%0d east=%0d saturated=%0d",
             n_loop, n_rest, n_serve, n_cancel, n_west, n_east, n_sat);
    check(n_loop > 0,   "fixed-time controller never completed a loop");
    check(n_rest > 0,   "main road never rested");
    check(n_serve > 0,  "no car served");
    check(n_cancel > 0, "no car left before being served");
    check(n_west > 0,   "west sensor alone never served");
    check(n_east > 0,   "east sensor alone never served");
    check(n_sat > 0,    "interval count never rested at its end value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
