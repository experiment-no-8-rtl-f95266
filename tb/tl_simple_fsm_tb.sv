// tl_simple_fsm_tb: self-checking test of the fixed-time state machine.
//
// Drives the timer flags and the clock enable at random and compares, every
// cycle, the state, the timer clear and the two lamp words with a reference
// written from the light plan: which flag ends each state, which state
// follows, and what each road shows. Checks that the controller leaves reset
// in the all-red state S2 and that it goes round the full loop several times.
module tl_simple_fsm_tb;
  import tl_pkg::*;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         en = 1'b0;
  timer_flags_t flags = '0;
  logic         timer_clr;
  lamp_t        ns, ew;
  tl_state_t    state;
  int           checks = 0, failures = 0;
  int           loops = 0;

  // reference: light plan, index = state number 0..5
  //                     S0     S1    S2    S3    S4    S5
  localparam int WAIT[6] = '{10,    1,    1,    5,    1,    1};
  localparam int NEXT[6] = '{1,     2,    3,    4,    5,    0};
  localparam logic [2:0] NS_L[6] = '{3'b001, 3'b010, 3'b100, 3'b100, 3'b100, 3'b100};
  localparam logic [2:0] EW_L[6] = '{3'b100, 3'b100, 3'b100, 3'b001, 3'b010, 3'b100};

  int model;

  tl_simple_fsm dut (
    .clk(clk), .rst(rst), .en(en), .flags(flags),
    .timer_clr(timer_clr), .ns(ns), .ew(ew), .state(state)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic bit flag_for(int st);
    case (WAIT[st])
      10:      return flags.t10;
      5:       return flags.t5;
      default: return flags.t1;
    endcase
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    model = 2;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en    = ($urandom_range(0, 2) != 0);
      flags = timer_flags_t'($urandom_range(0, 7));
      #1;
      check(int'(state) == model, $sformatf("cycle %0d state %0d expected %0d", i, state, model));
      check(ns == lamp_t'(NS_L[model]), $sformatf("cycle %0d ns %b", i, ns));
      check(ew == lamp_t'(EW_L[model]), $sformatf("cycle %0d ew %b", i, ew));
      check(timer_clr == flag_for(model), $sformatf("cycle %0d timer_clr %b", i, timer_clr));
      if (en && flag_for(model)) begin
        model = NEXT[model];
        if (model == 0) loops++;
      end
    end
    check(loops >= 5, $sformatf("only %0d full loops", loops));
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
