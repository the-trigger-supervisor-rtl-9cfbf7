// tb_partition_module: one partition board (geographic address 5) driven
// through its local register bus and its P2 and front panel signals.
// Covers register access and board selection, prescaler programming,
// uncoupled events (local strobe, gate timing and width, transaction
// counter, trigger pattern, interrupt and fast clear), prescaling, the
// Pulse register test trigger, and coupled events started by another board.
`timescale 1ns/1ps
module tb_partition_module;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] ga = 4'd5;
  local_req_t lreq = '0;
  logic hit;
  logic [15:0] rdata;
  logic [NCOMP-1:0] trig_a = '0, trig_b = '1;
  logic x_veto = 0, gate, init_interrupt, init_fast_clear;
  logic [NCOMP-1:0] mon_s1, mon_s2, mon_s3, mon_s4;
  logic std_pulse = 0, event_strobe = 0, delayed_event_strobe = 0;
  logic coupled = 0, busy_bit = 0, system_busy = 0, busy_clr = 0, global_veto = 0;
  logic system_first_level = 0, fl_drive, system_vote = 0, vote_drive;
  logic x_first_level, xsys_first_level, fast_clear_done;
  int checks = 0, failures = 0;

  partition_module dut (.*);

  always #0.5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("%t FAIL %s", $time, what); end
  endtask

  task automatic bus(input logic scaler, input logic wr, input logic word, input logic [3:0] board,
                     input logic [4:0] off, input logic [15:0] wd, output logic h, output logic [15:0] rd);
    @(negedge clk);
    lreq = '{valid: 1'b1, write: wr, word: word, scaler_sel: scaler, partition_sel: !scaler,
             board: board, offset: off, wdata: wd};
    #0.1 h = hit; rd = rdata;
    @(negedge clk);
    lreq = '0;
  endtask

  // busy bit as the control module keeps it for an uncoupled board
  always @(posedge clk) begin
    if (x_first_level && !coupled) busy_bit <= 1;
    if (fast_clear_done) busy_bit <= 0;
  end

  // a standardized interaction pulse (uncoupled boards build their own strobe)
  task automatic std(input int comp_mask, input int len_a);
    @(negedge clk);
    std_pulse = 1;
    @(negedge clk);
    trig_a = NCOMP'(comp_mask);
    repeat (len_a) @(negedge clk);
    trig_a = '0;
    repeat (49 - len_a) @(negedge clk);
    std_pulse = 0;
  endtask

  logic h;
  logic [15:0] rd;

  initial begin
    int t, w, n_gate;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // registers
    bus(0, 1, 1, 5, 5'h0, 16'hA5_0C, h, rd);
    check(h, "board 5 answers");
    bus(0, 0, 0, 5, 5'h0, 16'h0, h, rd);
    check(rd == 16'h00A5, "Enable byte");
    bus(0, 0, 0, 5, 5'h1, 16'h0, h, rd);
    check(rd == 16'h000C, "Veto Override byte");
    bus(0, 0, 1, 6, 5'h0, 16'h0, h, rd);
    check(!h, "board 6 not answered by board 5");
    bus(0, 1, 0, 5, 5'h0, 16'h00FF, h, rd);   // all components enabled
    bus(0, 1, 0, 5, 5'h1, 16'h0004, h, rd);   // component 2 survives vetoes
    // prescaler of component 1: factor 2 (0xFFFFFE); byte writes then word read
    bus(1, 1, 0, 5, 5'(4 * 1 + 3), 16'h00FE, h, rd);
    bus(1, 0, 1, 5, 5'(4 * 1 + 2), 16'h0, h, rd);
    check(h && rd == 16'hFFFE, "prescaler word read");
    bus(1, 0, 0, 5, 5'(4 * 1 + 1), 16'h0, h, rd);
    check(rd == 16'h00FF, "prescaler high byte");
    bus(1, 0, 1, 5, 5'(4 * 1 + 0), 16'h0, h, rd);
    check(rd == 16'h00FF, "prescaler word at slot start");

    // monitor points follow the component inputs
    @(negedge clk);
    trig_a = 8'h3C; trig_b = 8'hF0;
    #0.1 check(mon_s1 == 8'h3C && mon_s2 == 8'hF0 && mon_s3 == 8'h30, "S1..S3 monitors");
    @(negedge clk);
    trig_a = '0; trig_b = '1;

    // uncoupled event from component 0, no veto: gate and interrupt
    fork
      std(1, 10);
      begin
        t = 0; n_gate = 0;
        @(posedge std_pulse);
        while (!gate) begin @(negedge clk); t++; end
        while (gate) begin @(negedge clk); n_gate++; end
      end
    join
    check(t == 30, $sformatf("gate %0d cycles after the standardized pulse", t));
    check(n_gate == 50, $sformatf("gate width %0d", n_gate));
    bus(0, 0, 0, 5, 5'h2, 16'h0, h, rd);
    check(rd == 16'h0001, "transaction counter");
    bus(0, 0, 0, 5, 5'h3, 16'h0, h, rd);
    check(rd == 16'h0001, "trigger pattern");
    check(busy_bit, "busy bit set");
    t = 0;
    while (!init_interrupt && t < 2000) begin @(negedge clk); t++; end
    check(init_interrupt, "interrupt without veto");
    while (init_interrupt) @(negedge clk);
    // readout done: software clears busy
    busy_bit = 0; busy_clr = 1; @(negedge clk); busy_clr = 0;

    // busy: a second interaction gives no gate while busy
    busy_bit = 1;
    repeat (10) @(negedge clk);
    n_gate = 0;
    fork std(1, 10); repeat (120) begin @(negedge clk); if (gate) n_gate++; end join
    check(n_gate == 0, "no gate while busy");
    busy_bit = 0;

    // vetoed event: fast clear and busy released
    repeat (10) @(negedge clk);
    fork
      std(8, 10);
      begin repeat (300) @(negedge clk); x_veto = 1; repeat (5) @(negedge clk); x_veto = 0; end
    join
    t = 0;
    while (!init_fast_clear && !init_interrupt && t < 2000) begin @(negedge clk); t++; end
    check(init_fast_clear, "veto gives fast clear");
    while (!fast_clear_done) @(negedge clk);
    @(negedge clk);
    check(!busy_bit, "busy released after fast clear");

    // veto survivor component 2: vetoed but kept
    repeat (10) @(negedge clk);
    fork
      std(4, 10);
      begin repeat (300) @(negedge clk); x_veto = 1; repeat (5) @(negedge clk); x_veto = 0; end
    join
    t = 0;
    while (!init_fast_clear && !init_interrupt && t < 2000) begin @(negedge clk); t++; end
    check(init_interrupt, "veto survivor keeps the event");
    while (init_interrupt) @(negedge clk);
    busy_bit = 0; busy_clr = 1; @(negedge clk); busy_clr = 0;

    // prescaled component 1 (factor 2): first of two events passes? count them
    w = 0;
    for (int e = 0; e < 4; e++) begin
      repeat (130) @(negedge clk);
      fork std(2, 10); join
      if (busy_bit) begin
        w++;
        while (!init_interrupt) @(negedge clk);
        while (init_interrupt) @(negedge clk);
        busy_bit = 0; busy_clr = 1; @(negedge clk); busy_clr = 0;
      end
    end
    check(w == 2, $sformatf("factor 2: %0d of 4 events", w));

    // Pulse register: simulated trigger in all enabled components
    bus(0, 1, 0, 5, 5'h0, 16'h0040, h, rd);   // enable component 6 only
    repeat (10) @(negedge clk);
    bus(0, 1, 0, 5, 5'h4, 16'h0001, h, rd);
    fork std(0, 1); join
    bus(0, 0, 0, 5, 5'h3, 16'h0, h, rd);
    check(rd == 16'h0040, "test pulse fires the enabled component only");
    while (!init_interrupt) @(negedge clk);
    while (init_interrupt) @(negedge clk);
    busy_bit = 0; busy_clr = 1; @(negedge clk); busy_clr = 0;

    // coupled: another board's first level opens this board's gate
    coupled = 1;
    repeat (130) @(negedge clk);
    @(negedge clk); event_strobe = 1;
    repeat (3) @(negedge clk); system_first_level = 1; system_vote = 1;
    #0.1 check(!fl_drive, "no drive without own trigger");
    repeat (47) @(negedge clk); event_strobe = 0; system_first_level = 0;
    t = 0;
    fork
      begin repeat (28 - 50 + 50) @(negedge clk); end
    join
    // delayed strobe 28 cycles after the strobe
    delayed_event_strobe = 1;
    n_gate = 0;
    repeat (50) begin @(negedge clk); if (gate) n_gate++; end
    delayed_event_strobe = 0;
    @(negedge clk); if (gate) n_gate++;
    check(n_gate == 50, $sformatf("coupled gate width %0d", n_gate));
    bus(0, 0, 0, 5, 5'h3, 16'h0, h, rd);
    check(rd == 16'h0000, "empty pattern for an event caused elsewhere");
    t = 0;
    while (!init_interrupt && t < 2000) begin @(negedge clk); t++; end
    check(init_interrupt, "SYSTEM VOTE held: interrupt");
    system_vote = 0;
    // own trigger when coupled drives the backplane line
    bus(0, 1, 0, 5, 5'h0, 16'h0001, h, rd);
    @(negedge clk); event_strobe = 1; trig_a = 8'h01;
    #0.1 check(fl_drive && x_first_level, "coupled board drives SYSTEM FIRST-LEVEL");
    repeat (5) @(negedge clk); event_strobe = 0; trig_a = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
