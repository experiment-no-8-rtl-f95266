// tl_sensed_fsm_tb: self-checking test of the sensor-driven state machine.
//
// Drives sensors, timer flags and clock enable at random and compares, every
// cycle, the state, the timer clear and both lamp words with a reference
// written from the light plan. Counts how often the main road rests with no
// car, how often a sensed car goes away before being served (SS back to S0)
// and how often the side road is served, and fails if any never happened.
module tl_sensed_fsm_tb;
  import tl_pkg::*;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         en = 1'b0;
  logic         sens_w = 1'b0, sens_e = 1'b0;
  timer_flags_t flags = '0;
  logic         timer_clr;
  lamp_t        ns, ew;
  tl_state_t    state;
  int           checks = 0, failures = 0;
  int           n_rest = 0, n_cancel = 0, n_serve = 0, n_west = 0, n_east = 0;

  localparam int S0 = 0, S1 = 1, S2 = 2, S3 = 3, S4 = 4, S5 = 5, SS = 6;
  //                                S0      S1      S2      S3      S4      S5      SS
  localparam logic [2:0] NS_L[7] = '{3'b001, 3'b010, 3'b100, 3'b100, 3'b100, 3'b100, 3'b001};
  localparam logic [2:0] EW_L[7] = '{3'b100, 3'b100, 3'b100, 3'b001, 3'b010, 3'b100, 3'b100};

  int model, nxt;
  bit clr_exp;

  tl_sensed_fsm dut (
    .clk(clk), .rst(rst), .en(en), .sens_w(sens_w), .sens_e(sens_e), .flags(flags),
    .timer_clr(timer_clr), .ns(ns), .ew(ew), .state(state)
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
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    model = S2;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      en     = ($urandom_range(0, 2) != 0);
      flags  = timer_flags_t'($urandom_range(0, 7));
      // sensors are mostly quiet so the main road rests now and then
      sens_w = ($urandom_range(0, 5) == 0);
      sens_e = ($urandom_range(0, 5) == 0);
      #1;
      nxt = model;
      clr_exp = 1'b0;
      case (model)
        S0: if (sens_w || sens_e) begin nxt = SS; clr_exp = 1; end
        SS: if (!(sens_w || sens_e)) nxt = S0;
            else if (flags.t10) begin nxt = S1; clr_exp = 1; end
        S1: if (flags.t1) begin nxt = S2; clr_exp = 1; end
        S2: if (flags.t1) begin nxt = S3; clr_exp = 1; end
        S3: if (flags.t5) begin nxt = S4; clr_exp = 1; end
        S4: if (flags.t1) begin nxt = S5; clr_exp = 1; end
        S5: if (flags.t1) begin nxt = S0; clr_exp = 1; end
        default: ;
      endcase
      check(int'(state) == model, $sformatf("cycle %0d state %0d expected %0d", i, state, model));
      check(ns == lamp_t'(NS_L[model]), $sformatf("cycle %0d ns %b", i, ns));
      check(ew == lamp_t'(EW_L[model]), $sformatf("cycle %0d ew %b", i, ew));
      check(timer_clr == clr_exp, $sformatf("cycle %0d timer_clr %b", i, timer_clr));
      if (en) begin
        if (model == S0 && nxt == S0) n_rest++;
        if (model == SS && nxt == S0) n_cancel++;
        if (model == SS && nxt == S1) begin
          n_serve++;
          if (sens_w && !sens_e) n_west++;
          if (sens_e && !sens_w) n_east++;
        end
        model = nxt;
      end
    end
    check(n_rest > 0, "main road never rested");
    check(n_cancel > 0, "no car ever left before being served");
    check(n_serve > 0, "side road never served");
    check(n_west > 0 && n_east > 0, "each sensor alone never triggered service");
    $display("rest=%0d cancel=%0d serve=%0d (west only %0d, east only %0d)",
             n_rest, n_cancel, n_serve, n_west, n_east);
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
