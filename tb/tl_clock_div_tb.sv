// tl_clock_div_tb: self-checking test of the selectable clock divider.
//
// Runs the divider with small divide ratios (6, 10, 20, 40 board cycles for
// the 1 kHz, 10 Hz, 1 Hz and 1/10 Hz settings) so every rate is seen. For
// each setting it measures, from the output waveform alone, the spacing of
// tick pulses (must equal the ratio N), the high time of out_clk per period
// (N/2+1 cycles) and that tick coincides with the rising edge of out_clk.
// It also switches the rate in mid-period, from the slowest to the fastest,
// and checks that the next tick comes within N_fast cycles.
module tl_clock_div_tb;
  import tl_pkg::*;

  localparam int unsigned D0 = 40, D1 = 20, D2 = 10, D3 = 6;

  logic  clk = 1'b0;
  logic  rst = 1'b1;
  rate_t sel = RATE_1KHZ;
  logic  out_clk, tick;
  int    checks = 0, failures = 0;

  tl_clock_div #(.DIV_0P1HZ(D0), .DIV_1HZ(D1), .DIV_10HZ(D2), .DIV_1KHZ(D3)) dut (
    .clk(clk), .rst(rst), .sel(sel), .out_clk(out_clk), .tick(tick)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Measure three full periods at the current setting.
  task automatic measure(input int unsigned n);
    int unsigned gap, high;
    logic prev_clk;
    // align on a tick
    do @(posedge clk); while (!tick);
    for (int p = 0; p < 3; p++) begin
      gap  = 0;
      high = 0;
      do begin
        if (out_clk) high++;
        prev_clk = out_clk;
        @(posedge clk);
        gap++;
        if (tick) check(out_clk && !prev_clk, "tick not on out_clk rising edge");
      end while (!tick);
      check(gap == n, $sformatf("period %0d, expected %0d", gap, n));
      check(high == n / 2 + 1, $sformatf("high time %0d, expected %0d", high, n / 2 + 1));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    sel <= RATE_1KHZ;  measure(D3);
    sel <= RATE_10HZ;  @(posedge clk); measure(D2);
    sel <= RATE_1HZ;   @(posedge clk); measure(D1);
    sel <= RATE_0P1HZ; @(posedge clk); measure(D0);
    // switch mid-period from 1/10 Hz to 1 kHz when the count is past 6
    do @(posedge clk); while (!tick);
    repeat (25) @(posedge clk);
    sel <= RATE_1KHZ;
    begin
      int unsigned wait_n;
      wait_n = 0;
      do begin @(posedge clk); wait_n++; end while (!tick && wait_n < 100);
      check(wait_n <= D3, $sformatf("rate switch took %0d cycles", wait_n));
    end
    measure(D3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
