// tl_pkg: types and constants shared by the traffic light controllers.
//
// Lamp encoding: each direction (north-south, east-west) drives a 3-bit lamp
// word, one-hot, {red, yellow, green}. 3'b100 is red, 3'b010 yellow and
// 3'b001 green, which is how the controller's output table reads (the state
// that ends on the timer's longest interval shows 001 on the road that then
// turns 010 and then 100).
//
// Controller states follow the lab's naming: S0 = north-south green,
// S1 = north-south yellow, S2 = all red, S3 = east-west green,
// S4 = east-west yellow, S5 = all red, SS = north-south green while an
// east-west car is waiting (sensed intersection only).
//
// Rate select of the clock divider is {s1, s0} as on the board switches:
// 00 = 1/10 Hz, 01 = 1 Hz, 10 = 10 Hz, 11 = 1 kHz off the 50 MHz oscillator.
package tl_pkg;

  typedef enum logic [2:0] {
    LAMP_RED    = 3'b100,
    LAMP_YELLOW = 3'b010,
    LAMP_GREEN  = 3'b001
  } lamp_t;

  typedef enum logic [2:0] {
    ST_S0 = 3'd0,
    ST_S1 = 3'd1,
    ST_S2 = 3'd2,
    ST_S3 = 3'd3,
    ST_S4 = 3'd4,
    ST_S5 = 3'd5,
    ST_SS = 3'd6
  } tl_state_t;

  // Interval flags from the timer: each is high once the count since the
  // last clear has passed 1, 5 or 10 ticks.
  typedef struct packed {
    logic t1;
    logic t5;
    logic t10;
  } timer_flags_t;

  // {s1, s0}
  typedef enum logic [1:0] {
    RATE_0P1HZ = 2'b00,
    RATE_1HZ   = 2'b01,
    RATE_10HZ  = 2'b10,
    RATE_1KHZ  = 2'b11
  } rate_t;

  // Divide ratios off a 50 MHz board clock.
  localparam int unsigned DIV_0P1HZ_DEFAULT = 500_000_000;
  localparam int unsigned DIV_1HZ_DEFAULT   = 50_000_000;
  localparam int unsigned DIV_10HZ_DEFAULT  = 5_000_000;
  localparam int unsigned DIV_1KHZ_DEFAULT  = 50_000;

endpackage
