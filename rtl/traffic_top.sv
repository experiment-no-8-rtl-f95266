// traffic_top: the lab's two traffic light controllers side by side.
//
// The fixed-time intersection (tl_simple_intersection) and the sensor-driven
// intersection (tl_sensed_intersection) are independent designs; here they
// share only the 50 MHz board clock and the reset, and each has its own
// clock divider, timer and state machine, as in the lab. Each brings out its
// own lamp words, state and divided clock; the sensed controller takes the
// two side-road car sensors.
//
// Interface: clk_in (50 MHz), rst (synchronous, active high; this design's
// addition), sens_w, sens_e, simple_ns/simple_ew and sensed_ns/sensed_ew as
// one-hot {red, yellow, green} lamp words, simple_state/sensed_state and
// simple_rate_clk/sensed_rate_clk for observation. RATE and the four divide
// ratios pass down to both controllers; defaults are the lab's
// (10 Hz controller rate off 50 MHz).
module traffic_top
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
  output lamp_t     simple_ns,
  output lamp_t     simple_ew,
  output tl_state_t simple_state,
  output logic      simple_rate_clk,
  output lamp_t     sensed_ns,
  output lamp_t     sensed_ew,
  output tl_state_t sensed_state,
  output logic      sensed_rate_clk
);

  tl_simple_intersection #(
    .RATE(RATE), .DIV_0P1HZ(DIV_0P1HZ), .DIV_1HZ(DIV_1HZ),
    .DIV_10HZ(DIV_10HZ), .DIV_1KHZ(DIV_1KHZ)
  ) u_simple (
    .clk_in(clk_in), .rst(rst),
    .ns(simple_ns), .ew(simple_ew), .state(simple_state),
    .rate_clk(simple_rate_clk)
  );

  tl_sensed_intersection #(
    .RATE(RATE), .DIV_0P1HZ(DIV_0P1HZ), .DIV_1HZ(DIV_1HZ),
    .DIV_10HZ(DIV_10HZ), .DIV_1KHZ(DIV_1KHZ)
  ) u_sensed (
    .clk_in(clk_in), .rst(rst), .sens_w(sens_w), .sens_e(sens_e),
    .ns(sensed_ns), .ew(sensed_ew), .state(sensed_state),
    .rate_clk(sensed_rate_clk)
  );

endmodule
