// tl_sensed_fsm: sensor-driven light sequencer for a main road (north-south)
// crossed by a side road (east-west) with car sensors on its west and east
// approaches.
//
// The main road rests on green in S0 for as long as no side-road car is
// sensed. A car on either sensor moves the controller to SS (main road still
// green) and clears the timer. If the car is gone before t10 the controller
// falls back to S0; if it is still there at t10 the main road is cleared and
// the side road served in the same fixed loop as the simple intersection:
//   S0 NS green  / EW red    until sens_w or sens_e  -> SS
//   SS NS green  / EW red    no sensor -> S0; else t10 -> S1
//   S1 NS yellow / EW red    until t1
//   S2 NS red    / EW red    until t1
//   S3 NS red    / EW green  until t5
//   S4 NS red    / EW yellow until t1
//   S5 NS red    / EW red    until t1, then back to S0
// The transitions are the lab's. The timer is cleared on every transition
// except SS -> S0, again as in the lab, so a later return to SS clears it on
// entry. SS shows NS green / EW red: the lab's output table lists S5 twice
// and SS not at all; the first of the two S5 lines (NS green) is read as the
// SS entry, which also keeps the main road green while a car is merely
// being confirmed. Reset into S2 (all red), the clock enable `en` and the
// reset input are as in tl_simple_fsm.
//
// Interface: clk, rst (synchronous), en, sens_w, sens_e (synchronous to clk,
// sampled with en), flags, timer_clr (combinational), ns/ew (Moore), state.
module tl_sensed_fsm
  import tl_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         sens_w,
  input  logic         sens_e,
  input  timer_flags_t flags,
  output logic         timer_clr,
  output lamp_t        ns,
  output lamp_t        ew,
  output tl_state_t    state
);

  tl_state_t state_d;
  logic      car;

  assign car = sens_w | sens_e;

  always_ff @(posedge clk) begin
    if (rst)
      state <= ST_S2;
    else if (en)
      state <= state_d;
  end

  always_comb begin
    state_d   = state;
    timer_clr = 1'b0;
    unique case (state)
      ST_S0: if (car) begin
        state_d   = ST_SS;
        timer_clr = 1'b1;
      end
      ST_SS: if (!car) begin
        state_d = ST_S0;
      end else if (flags.t10) begin
        state_d   = ST_S1;
        timer_clr = 1'b1;
      end
      ST_S1: if (flags.t1) begin
        state_d   = ST_S2;
        timer_clr = 1'b1;
      end
      ST_S2: if (flags.t1) begin
        state_d   = ST_S3;
        timer_clr = 1'b1;
      end
      ST_S3: if (flags.t5) begin
        state_d   = ST_S4;
        timer_clr = 1'b1;
      end
      ST_S4: if (flags.t1) begin
        state_d   = ST_S5;
        timer_clr = 1'b1;
      end
      ST_S5: if (flags.t1) begin
        state_d   = ST_S0;
        timer_clr = 1'b1;
      end
      default: begin
        state_d   = ST_S2;
        timer_clr = 1'b1;
      end
    endcase
  end

  always_comb begin
    ns = LAMP_RED;
    ew = LAMP_RED;
    unique case (state)
      ST_S0, ST_SS: ns = LAMP_GREEN;
      ST_S1:        ns = LAMP_YELLOW;
      ST_S3:        ew = LAMP_GREEN;
      ST_S4:        ew = LAMP_YELLOW;
      default: ;
    endcase
  end

  // At least one road always sees red.
  a_one_road_red : assert property (@(posedge clk) disable iff (rst)
      ns == LAMP_RED || ew == LAMP_RED);
  // The side road is only served after a car has been sensed in SS.
  a_serve_after_sense : assert property (@(posedge clk) disable iff (rst)
      (en && state == ST_SS && state_d == ST_S1) |-> car);

endmodule
