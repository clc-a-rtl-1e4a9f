// tb_clc_adaptive_control: walks the Adaptive Control FSM through its paths
// and compares state, EN and READY cycle by cycle with the expected sequence:
//   idle while START=0; START -> DEC_PT1 (EN=1); EXTEND=0 -> FINISH
//   (READY=1) -> IDLE; EXTEND=1 -> DEC_PT2 (EN=1) -> FINISH -> IDLE; and
//   RESET from a busy state back to IDLE. Also checks that READY comes two
//   cycles after START for one step and three cycles after for two steps.
module tb_clc_adaptive_control;
  import clc_pkg::*;

  logic clk = 0, rst, start, extend, en, ready;
  ac_state_t state;
  int checks = 0, failures = 0;

  clc_adaptive_control dut (.clk(clk), .rst(rst), .start(start), .extend(extend),
                            .en(en), .ready(ready), .state(state));

  always #5 clk = ~clk;

  task automatic expect_st(ac_state_t s, logic e, logic r);
    checks++;
    if (state !== s || en !== e || ready !== r) begin
      failures++;
      $display("FAIL t=%0t state=%0d en=%b ready=%b, exp %0d %b %b", $time, state, en, ready, s, e, r);
    end
  endtask

  // Pulse START, then report the number of clock edges until READY.
  task automatic run(logic ext, output int lat);
    start = 1;
    extend = ext;
    @(posedge clk); #1;
    start = 0;
    lat = 1;
    while (!ready && lat < 10) begin
      @(posedge clk); #1;
      lat++;
    end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    rst = 1; start = 0; extend = 0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    expect_st(ST_IDLE, 0, 0);
    repeat (3) begin @(posedge clk); #1; expect_st(ST_IDLE, 0, 0); end
    // One-step decode: START, DEC_PT1, FINISH, IDLE.
    start = 1; extend = 0;
    @(posedge clk); #1; start = 0;
    expect_st(ST_DEC_PT1, 1, 0);
    @(posedge clk); #1; expect_st(ST_FINISH, 0, 1);
    @(posedge clk); #1; expect_st(ST_IDLE, 0, 0);
    // Two-step decode.
    start = 1; extend = 1;
    @(posedge clk); #1; start = 0;
    expect_st(ST_DEC_PT1, 1, 0);
    @(posedge clk); #1; expect_st(ST_DEC_PT2, 1, 0);
    extend = 0;
    @(posedge clk); #1; expect_st(ST_FINISH, 0, 1);
    @(posedge clk); #1; expect_st(ST_IDLE, 0, 0);
    // EXTEND in DEC_PT2 does not add a third step.
    start = 1; extend = 1;
    @(posedge clk); #1; start = 0;
    @(posedge clk); #1; expect_st(ST_DEC_PT2, 1, 0);
    @(posedge clk); #1; expect_st(ST_FINISH, 0, 1);
    @(posedge clk); #1; expect_st(ST_IDLE, 0, 0);
    // Latencies.
    run(0, lat);
    checks++;
    if (lat != 2) begin failures++; $display("FAIL one-step latency %0d", lat); end
    @(posedge clk); #1;
    run(1, lat);
    checks++;
    if (lat != 3) begin failures++; $display("FAIL two-step latency %0d", lat); end
    @(posedge clk); #1;
    // Reset from DEC_PT2.
    start = 1; extend = 1;
    @(posedge clk); #1; start = 0;
    @(posedge clk); #1; expect_st(ST_DEC_PT2, 1, 0);
    rst = 1;
    @(posedge clk); #1; expect_st(ST_IDLE, 0, 0);
    rst = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
