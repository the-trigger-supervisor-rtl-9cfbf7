// tb_veto_logic: directed events through the second-level veto logic.
//   1 uncoupled event, no veto: interrupt exactly 1000 cycles after the
//     first-level edge, 250 cycles long, then the vote is cleared;
//   2 uncoupled event vetoed at 500 cycles: fast clear, done pulse at end;
//   3 vetoed event with a veto survivor: interrupt all the same;
//   4 global veto with a survivor: fast clear;
//   5 coupled partition with no vote of its own but SYSTEM VOTE high:
//     interrupt, and the vote drive follows X VOTE only when coupled;
//   6 X BUSY CLR clears the vote;
//   7 veto arriving after the decision time changes nothing.
`timescale 1ns/1ps
module tb_veto_logic;
  logic clk = 0, rst_n = 0;
  logic x_first_level = 0, xsys_first_level = 0, survivor_hit = 0, x_veto = 0;
  logic busy_clr = 0, coupled = 0, system_vote = 0, global_veto = 0;
  logic x_vote, vote_drive, survivor, init_interrupt, init_fast_clear, fast_clear_done;
  int checks = 0, failures = 0;

  veto_logic dut (.*);

  always #0.5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("%t FAIL %s", $time, what); end
  endtask

  // Fires a first-level pulse (own and system) with optional survivor, then
  // runs veto at cycle veto_at (-1: none) and returns the cycle at which an
  // outcome started, and which one.
  task automatic event_run(input logic own, input logic surv, input int veto_at,
                           output int t_out, output logic was_int);
    int t;
    @(negedge clk);
    x_first_level = own; xsys_first_level = 1; survivor_hit = surv & own;
    t = 0;
    fork
      begin
        repeat (20) @(negedge clk);
        x_first_level = 0; xsys_first_level = 0; survivor_hit = 0;
      end
    join_none
    while (!init_interrupt && !init_fast_clear) begin
      @(negedge clk);
      t++;
      if (t == veto_at) x_veto = 1;
      if (t == veto_at + 3) x_veto = 0;
      if (t > 2000) break;
    end
    t_out = t;  // 1001 here: the edge that samples the first-level, plus 1000 cycles
    was_int = init_interrupt;
  endtask

  initial begin
    int t, len;
    logic wi;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // 1
    event_run(1, 0, -1, t, wi);
    check(wi && t == 1001, $sformatf("1: interrupt at %0d", t));
    check(x_vote, "1: vote held during interrupt");
    len = 0;
    while (init_interrupt) begin @(negedge clk); len++; end
    check(len == 250, $sformatf("1: interrupt length %0d", len));
    check(!x_vote, "1: vote cleared at interrupt + 250");

    // 2
    repeat (10) @(negedge clk);
    event_run(1, 0, 500, t, wi);
    check(!wi && init_fast_clear && t == 1001, "2: fast clear after veto");
    len = 0;
    while (init_fast_clear) begin @(negedge clk); len++; check(!fast_clear_done || len == 250, "2: done early"); end
    check(fast_clear_done, "2: done pulse");
    check(len == 250, $sformatf("2: fast clear length %0d", len));

    // 3
    repeat (10) @(negedge clk);
    event_run(1, 1, 300, t, wi);
    check(wi, "3: survivor overrides the veto");
    check(!survivor || init_interrupt, "3: survivor flag");
    while (init_interrupt) @(negedge clk);
    check(!survivor, "3: survivor flag cleared with the vote");

    // 4
    repeat (10) @(negedge clk);
    global_veto = 1;
    event_run(1, 1, -1, t, wi);
    check(!wi && init_fast_clear, "4: global veto forces fast clear");
    global_veto = 0;
    while (init_fast_clear) @(negedge clk);
    busy_clr = 1; @(negedge clk); busy_clr = 0;

    // 5
    repeat (10) @(negedge clk);
    coupled = 1; system_vote = 1;
    event_run(0, 0, -1, t, wi);
    check(wi && t == 1001, "5: SYSTEM VOTE keeps a coupled partition's event");
    check(!x_vote && !vote_drive, "5: no own vote");
    while (init_interrupt) @(negedge clk);
    system_vote = 0;
    event_run(1, 0, 100, t, wi);
    check(!wi, "5b: coupled, all votes withdrawn: fast clear");
    while (init_fast_clear) @(negedge clk);

    // 6
    @(negedge clk);
    x_first_level = 1; @(negedge clk); x_first_level = 0;
    @(negedge clk);
    check(x_vote && vote_drive, "6: vote set and driven when coupled");
    coupled = 0; #0.1;
    check(x_vote && !vote_drive, "6: not driven when uncoupled");
    @(negedge clk);
    busy_clr = 1; @(negedge clk); busy_clr = 0;
    check(!x_vote, "6: busy clear clears vote");

    // 8: a glitch on the trailing edge of X/SYSTEM FIRST-LEVEL does not
    //    restart the 1 us delay
    repeat (5) @(negedge clk);
    fork
      begin
        repeat (22) @(negedge clk);
        xsys_first_level = 1; @(negedge clk); xsys_first_level = 0;
      end
    join_none
    event_run(1, 0, -1, t, wi);
    check(wi && t == 1001, $sformatf("8: decision at %0d despite the glitch", t));
    while (init_interrupt) @(negedge clk);

    // 7: veto after the decision
    repeat (5) @(negedge clk);
    event_run(1, 0, -1, t, wi);
    x_veto = 1; repeat (3) @(negedge clk); x_veto = 0;
    check(init_interrupt && !init_fast_clear, "7: late veto changes nothing");
    while (init_interrupt) @(negedge clk);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
