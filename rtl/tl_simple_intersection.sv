// tl_simple_intersection: complete fixed-time two-road traffic light.
//
// The lab's simple-intersection controller: a selectable clock divider
// turns the 50 MHz board clock into the controller rate (10 Hz, select
// {s1,s0} = 10, as the lab ties it), a 4-bit interval timer measures how long
// each state has lasted, and tl_simple_fsm steps the lamps through
// NS green (t10), NS yellow (t1), all red (t1), EW green (t5),
// EW yellow (t1), all red (t1). At 10 Hz one full loop is 31 ticks, 3.1 s:
// green 1.2 s / 0.7 s, yellow and all-red 0.3 s each.
//
// The divider's tick is used as clock enable for timer and state machine,
// where the lab clocks them with the divided clock; rst is this design's
// (the lab relies on power-up values). Everything runs on clk_in.
//
// Interface: clk_in, rst (synchronous, active high), ns, ew (one-hot
// {red, yellow, green}), state and rate_clk for observation.
module tl_simple_intersection
  import tl_pkg::*;
#(
  parameter rate_t       RATE      = RATE_10HZ,
  parameter int unsigned DIV_0P1HZ = DIV_0P1HZ_DEFAULT,
  parameter int unsigned DIV_1HZ   = DIV_1HZ_DEFAULT,
  parameter int unsigned DIV_10HZ  = DIV_10HZ_DEFAULT,
  parameter int unsigned DIV_1KHZ  = DIV_1KHZ_DEFAULT
) (
  input  logic      clk_in,
  input  logic      rst,
  output lamp_t     ns,
  output lamp_t     ew,
  output tl_state_t state,
  output logic      rate_clk
);

  logic         tick;
  logic         timer_clr;
  timer_flags_t flags;

  tl_clock_div #(
    .DIV_0P1HZ(DIV_0P1HZ), .DIV_1HZ(DIV_1HZ),
    .DIV_10HZ (DIV_10HZ),  .DIV_1KHZ(DIV_1KHZ)
  ) u_div (
    .clk(clk_in), .rst(rst), .sel(RATE), .out_clk(rate_clk), .tick(tick)
  );

  tl_timer u_timer (
    .clk(clk_in), .rst(rst), .en(tick), .clr(timer_clr),
    .flags(flags), .count()
  );

  tl_simple_fsm u_fsm (
    .clk(clk_in), .rst(rst), .en(tick), .flags(flags),
    .timer_clr(timer_clr), .ns(ns), .ew(ew), .state(state)
  );

endmodule
