// tl_sensed_intersection: complete sensor-driven traffic light for a main
// road (north-south) crossed by a side road (east-west).
//
// The lab's sensored-intersection controller: the same 10 Hz clock divider
// and 4-bit interval timer as the simple intersection, driving
// tl_sensed_fsm, which keeps the main road green until a car is sensed on
// the side road's west or east approach. Once a car is seen, it must be
// sensed on every one of the next 12 ticks (1.2 s at 10 Hz) before the main
// road goes yellow; if it leaves earlier the main road simply stays green.
// The side road then gets its fixed green, yellow and all-red phases.
//
// The divider's tick is used as clock enable for timer and state machine,
// where the lab clocks them with the divided clock; rst is this design's.
// The sensor inputs must be synchronous to clk_in (a board design would put
// a two-flop synchroniser in front; the lab has none and none is added).
//
// Interface: clk_in, rst (synchronous, active high), sens_w, sens_e,
// ns, ew (one-hot {red, yellow, green}), state and rate_clk for observation.
module tl_sensed_intersection
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
  input  logic      sens_w,
  input  logic      sens_e,
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

  tl_sensed_fsm u_fsm (
    .clk(clk_in), .rst(rst), .en(tick), .sens_w(sens_w), .sens_e(sens_e),
    .flags(flags), .timer_clr(timer_clr), .ns(ns), .ew(ew), .state(state)
  );

endmodule
