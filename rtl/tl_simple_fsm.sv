// tl_simple_fsm: fixed-time light sequencer for a two-road intersection.
//
// Six states run in a fixed loop, each left when the timer flag it waits on
// is high; on leaving, the state machine clears the timer so the next state
// times from zero:
//   S0 NS green  / EW red    until t10
//   S1 NS yellow / EW red    until t1
//   S2 NS red    / EW red    until t1
//   S3 NS red    / EW green  until t5
//   S4 NS red    / EW yellow until t1
//   S5 NS red    / EW red    until t1, then back to S0
// States, flags and lamp outputs are the lab's; the state comes out of reset
// in S2 (all red), the lab's power-up state. The reset input and the clock
// enable are this design's: the register moves only when `en` (the divider
// tick) is high, where the lab clocks it with the divided clock.
//
// Interface: clk, rst (synchronous), en, flags from tl_timer, timer_clr to
// tl_timer (combinational, high in the cycle a transition is taken), ns/ew
// lamp words (Moore outputs, decoded from the state register), state.
module tl_simple_fsm
  import tl_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  timer_flags_t flags,
  output logic         timer_clr,
  output lamp_t        ns,
  output lamp_t        ew,
  output tl_state_t    state
);

  tl_state_t state_d;

  always_ff @(posedge clk) begin
    if (rst)
      state <= ST_S2;
    else if (en)
      state <= state_d;
  end

  always_comb begin
    logic go;
    unique case (state)
      ST_S0:   go = flags.t10;
      ST_S3:   go = flags.t5;
      default: go = flags.t1;
    endcase
    timer_clr = go;
    state_d   = state;
    if (go) begin
      unique case (state)
        ST_S0:   state_d = ST_S1;
        ST_S1:   state_d = ST_S2;
        ST_S2:   state_d = ST_S3;
        ST_S3:   state_d = ST_S4;
        ST_S4:   state_d = ST_S5;
        default: state_d = ST_S0;  // S5, and SS which this controller never enters
      endcase
    end
  end

  always_comb begin
    ns = LAMP_RED;
    ew = LAMP_RED;
    unique case (state)
      ST_S0:   ns = LAMP_GREEN;
      ST_S1:   ns = LAMP_YELLOW;
      ST_S3:   ew = LAMP_GREEN;
      ST_S4:   ew = LAMP_YELLOW;
      default: ;
    endcase
  end

  // At least one road always sees red.
  a_one_road_red : assert property (@(posedge clk) disable iff (rst)
      ns == LAMP_RED || ew == LAMP_RED);
  a_legal_state : assert property (@(posedge clk) disable iff (rst)
      state != ST_SS);

endmodule
