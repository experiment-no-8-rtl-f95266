// tl_timer: interval timer shared by the light state machines.
//
// A small counter is cleared by the state machine on each state change and
// then counts controller ticks, stopping one past the longest interval
// (it advances while count <= T10, so it rests at T10+1). Three flags compare
// the count: t1 = count > T1, t5 = count > T5, t10 = count > T10. The
// 4-bit width, the thresholds 1/5/10 and the saturating count are the lab's.
// The clock enable `en` is this design's addition: the lab clocks the timer
// with the divided clock, here it runs on the board clock and moves only on
// `en` (the divider's tick). `clr` is likewise sampled only with `en`.
//
// Interface: clk, rst (synchronous, count to 0), en, clr (synchronous clear),
// flags (combinational from the count register), count (for observation).
// Timing: after a clear the count is 0; t1 rises after 2 enabled edges,
// t5 after 6 and t10 after 11.
module tl_timer
  import tl_pkg::*;
#(
  parameter int unsigned W   = 4,
  parameter int unsigned T1  = 1,
  parameter int unsigned T5  = 5,
  parameter int unsigned T10 = 10
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         clr,
  output timer_flags_t flags,
  output logic [W-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
    end else if (en) begin
      if (clr)
        count <= '0;
      else if (count <= W'(T10))
        count <= count + 1'b1;
    end
  end

  always_comb begin
    flags.t1  = (count > W'(T1));
    flags.t5  = (count > W'(T5));
    flags.t10 = (count > W'(T10));
  end

  // The count never passes its resting value.
  a_saturates : assert property (@(posedge clk) disable iff (rst)
      count <= W'(T10 + 1));

endmodule
