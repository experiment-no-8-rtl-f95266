// tl_timer_tb: self-checking test of the interval timer at its default
// size (4 bits, thresholds 1, 5, 10).
//
// The testbench keeps its own count of enabled edges since the last clear
// and predicts each flag from the thresholds: t1 after 2 enabled edges,
// t5 after 6, t10 after 11, and no change once the count rests at 11.
// Enable and clear are driven at random, so edges without enable must leave
// the timer alone and a clear without enable must be ignored.
module tl_timer_tb;
  import tl_pkg::*;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         en = 1'b0;
  logic         clr = 1'b0;
  timer_flags_t flags;
  logic [3:0]   count;
  int           checks = 0, failures = 0;
  int           model = 0;
  int           saturated_seen = 0;

  tl_timer dut (.clk(clk), .rst(rst), .en(en), .clr(clr), .flags(flags), .count(count));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic compare(input string where);
    check(flags.t1  == (model >= 2),  $sformatf("%s t1 model=%0d", where, model));
    check(flags.t5  == (model >= 6),  $sformatf("%s t5 model=%0d", where, model));
    check(flags.t10 == (model >= 11), $sformatf("%s t10 model=%0d", where, model));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    compare("after reset");
    // plain count-up with enable always on
    en = 1'b1;
    for (int i = 0; i < 14; i++) begin
      @(posedge clk);
      model = (model < 11) ? model + 1 : model;
      @(negedge clk);
      compare($sformatf("count-up %0d", i));
      if (model == 11) saturated_seen++;
    end
    // random enable / clear
    for (int i = 0; i < 2000; i++) begin
      en  = ($urandom_range(0, 3) != 0);
      clr = ($urandom_range(0, 15) == 0);
      @(posedge clk);
      if (en) model = clr ? 0 : ((model < 11) ? model + 1 : model);
      @(negedge clk);
      compare($sformatf("random %0d", i));
      if (model == 11) saturated_seen++;
    end
    check(saturated_seen > 0, "count never reached its resting value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
