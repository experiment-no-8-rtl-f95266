// tl_clock_div: selectable clock divider for the traffic light controllers.
//
// A free-running counter advances on every board clock edge. When the
// incremented value reaches the divide ratio N of the selected rate it wraps
// to zero, so one output period is exactly N board cycles. The output clock
// is high while the new count is 0..N/2 and low for the rest, which gives the
// near-50 % waveform of the lab's divider (N/2+1 cycles high, N/2-1 low).
// The four ratios and the {s1, s0} select coding are the lab's:
// 00 -> 1/10 Hz, 01 -> 1 Hz, 10 -> 10 Hz, 11 -> 1 kHz off 50 MHz.
//
// Besides the divided clock this block gives `tick`, a one-board-cycle pulse
// that is high in the cycle out_clk rises. The controllers downstream run on
// the board clock with `tick` as clock enable instead of being clocked by
// out_clk; that keeps the design in one clock domain and is this design's
// choice, not the lab's. out_clk is still produced for an LED or a pin.
//
// Interface: clk/rst (synchronous, active high; clears the counter, as the
// lab's power-up value of 0 does), sel, out_clk, tick. Both outputs are
// registered. Changing sel takes effect at once; if the count is already past
// the new ratio it wraps on the next edge.
module tl_clock_div
  import tl_pkg::*;
#(
  parameter int unsigned DIV_0P1HZ = DIV_0P1HZ_DEFAULT,
  parameter int unsigned DIV_1HZ   = DIV_1HZ_DEFAULT,
  parameter int unsigned DIV_10HZ  = DIV_10HZ_DEFAULT,
  parameter int unsigned DIV_1KHZ  = DIV_1KHZ_DEFAULT
) (
  input  logic  clk,
  input  logic  rst,
  input  rate_t sel,
  output logic  out_clk,
  output logic  tick
);

  localparam int unsigned DIV_MAX =
      (DIV_0P1HZ > DIV_1HZ && DIV_0P1HZ > DIV_10HZ && DIV_0P1HZ > DIV_1KHZ) ? DIV_0P1HZ :
      (DIV_1HZ > DIV_10HZ && DIV_1HZ > DIV_1KHZ) ? DIV_1HZ :
      (DIV_10HZ > DIV_1KHZ) ? DIV_10HZ : DIV_1KHZ;
  localparam int unsigned CW = $clog2(DIV_MAX + 1);

  logic [CW-1:0] count_q;
  logic [CW-1:0] count_inc;
  logic [CW-1:0] count_d;
  logic [CW-1:0] div_n;

  always_comb begin
    unique case (sel)
      RATE_0P1HZ: div_n = CW'(DIV_0P1HZ);
      RATE_1HZ:   div_n = CW'(DIV_1HZ);
      RATE_10HZ:  div_n = CW'(DIV_10HZ);
      default:    div_n = CW'(DIV_1KHZ);
    endcase
  end

  always_comb begin
    count_inc = count_q + 1'b1;
    count_d   = (count_inc >= div_n) ? '0 : count_inc;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      count_q <= '0;
      out_clk <= 1'b0;
      tick    <= 1'b0;
    end else begin
      count_q <= count_d;
      out_clk <= (count_d <= (div_n >> 1));
      tick    <= (count_d == '0);
    end
  end

  // tick marks the rising edge of out_clk.
  a_tick_on_rise : assert property (@(posedge clk) disable iff (rst)
      tick |-> out_clk);

endmodule
