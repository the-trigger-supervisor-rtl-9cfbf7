// tb_trigger_supervisor: end-to-end test of the whole crate at its default
// size (16 partitions of 8 components, 24-bit prescalers, 1 ns cycle).
//
// A host task programs the registers through the VME window; partitions
// 0..3 are coupled, partition 8 runs uncoupled. A sequence of events with
// random trigger components, partition vetoes and global vetoes is applied,
// and for every event an independent model predicts which partitions get a
// gate, which get an interrupt and which a fast clear, and what the busy
// and event-counter registers hold. The test acts as the readout
// processors: after an interrupt it clears the partition's busy bit through
// Set-Clear Select and the Function byte. Gate timing must be the same
// for every partition and every event. Each mechanism of the design is
// counted and must have occurred at least once. A last phase keeps the
// uncoupled partition busy while a coupled event is taken, to show the two
// dead times are independent.
`timescale 1ns/1ps
module tb_trigger_supervisor;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0;
  vme_req_t vme_req = '0;
  vme_rsp_t vme_rsp;
  logic interaction_trigger = 0, global_veto = 0;
  logic [NPART-1:0][NCOMP-1:0] trig_a = '0, trig_b = '1, mon_s1, mon_s2, mon_s3, mon_s4;
  logic [NPART-1:0] x_veto = '0, gate, init_interrupt, init_fast_clear, busy;
  logic event_strobe, system_busy;
  int checks = 0, failures = 0;

  trigger_supervisor dut (.*);

  always #0.5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 30) $display("%t FAIL %s", $time, what); end
  endtask

  // ---------------- host access ----------------
  localparam logic [15:0] CTRL = 16'h0210;
  task automatic vme(input logic wr, input logic word, input logic [15:0] addr,
                     input logic [15:0] wd, output logic [15:0] rd);
    @(negedge clk);
    vme_req = '{valid: 1'b1, write: wr, word: word, am: AM_SHORT_USER, addr: addr, wdata: wd};
    @(negedge clk);
    vme_req = '0;
    check(vme_rsp.ack, $sformatf("ack for %h", addr));
    rd = vme_rsp.rdata;
  endtask
  function automatic logic [15:0] paddr(input int p, input logic [3:0] off);
    return 16'h0200 | 16'(p << 5) | 16'(off);
  endfunction
  function automatic logic [15:0] saddr(input int p, input int comp, input int by);
    return 16'(p << 5) | 16'(comp * 4 + by);
  endfunction

  // ---------------- configuration and model state ----------------
  localparam logic [15:0] COUPLED = 16'h000F;
  localparam int UNC = 8;
  logic [NPART-1:0][NCOMP-1:0] en, ovr;
  int unsigned factor [NPART][NCOMP];
  int unsigned since  [NPART][NCOMP];
  int unsigned evcount = 0;
  int unsigned trans [NPART];

  // ---------------- mechanism counters ----------------
  int n_coupled = 0, n_uncoupled = 0, n_prescale_reject = 0, n_busy_block = 0;
  int n_veto_fclr = 0, n_survivor = 0, n_global = 0, n_interrupt = 0, n_test = 0;
  int n_dropped = 0, n_no_trigger = 0, n_partial_coupled = 0, n_independent = 0;

  // ---------------- gate monitor ----------------
  int gate_rise [NPART];
  int gate_len  [NPART];
  int tcount = 0;
  logic [NPART-1:0] gate_q = '0;
  always @(negedge clk) begin
    tcount++;
    for (int p = 0; p < NPART; p++) begin
      if (gate[p] && !gate_q[p]) gate_rise[p] = tcount;
      if (gate[p]) gate_len[p]++;
    end
    gate_q = gate;
  end

  int strobes = 0;
  always @(posedge event_strobe) strobes++;

  // One event. comps[p] = trigger components present; veto / global as given.
  // Returns nothing; checks everything against the model.
  task automatic run_event(input logic [NPART-1:0][NCOMP-1:0] comps,
                           input logic [NPART-1:0] veto, input logic gv);
    logic [NPART-1:0] fl, vote, exp_gate, exp_int, exp_fclr;
    logic [NPART-1:0][NCOMP-1:0] acc;
    logic coupled_ev, outstanding;
    int t0;
    logic [15:0] rd;

    // model: acceptance per component
    acc = '0;
    for (int p = 0; p < NPART; p++)
      for (int c = 0; c < NCOMP; c++)
        if (comps[p][c] && en[p][c]) acc[p][c] = (since[p][c] == factor[p][c] - 1);
    for (int p = 0; p < NPART; p++) fl[p] = |acc[p];
    coupled_ev = |(fl & COUPLED);
    // prescaler bookkeeping: a rejected trigger advances its count unless its
    // busy domain became busy in this event
    for (int p = 0; p < NPART; p++)
      for (int c = 0; c < NCOMP; c++)
        if (comps[p][c] && en[p][c]) begin
          if (acc[p][c]) since[p][c] = 0;
          else if (!(COUPLED[p] ? coupled_ev : fl[p])) begin
            since[p][c]++;
            n_prescale_reject++;
          end
        end
    exp_gate = (coupled_ev ? COUPLED : '0) | (fl & ~COUPLED);
    for (int p = 0; p < NPART; p++)
      vote[p] = fl[p] && !(veto[p] && !(|(acc[p] & ovr[p])));
    exp_int = '0; exp_fclr = '0;
    if (coupled_ev) begin
      outstanding = |(vote & COUPLED) && !gv;
      if (outstanding) exp_int |= COUPLED; else exp_fclr |= COUPLED;
    end
    for (int p = 0; p < NPART; p++)
      if (!COUPLED[p] && fl[p]) begin
        if (vote[p] && !gv) exp_int[p] = 1; else exp_fclr[p] = 1;
      end

    // stimulus
    for (int p = 0; p < NPART; p++) begin gate_rise[p] = -1; gate_len[p] = 0; end
    @(negedge clk);
    trig_a = comps;
    @(negedge clk);
    interaction_trigger = 1; t0 = tcount;
    @(negedge clk);
    interaction_trigger = 0;
    repeat (60) @(negedge clk);
    trig_a = '0;
    repeat (240) @(negedge clk);
    x_veto = veto;
    repeat (5) @(negedge clk);
    x_veto = '0;
    repeat (590) @(negedge clk);
    global_veto = gv;
    repeat (200) @(negedge clk);
    global_veto = 0;

    // outcomes: at this point (about 1100 cycles in) the decision is made
    for (int p = 0; p < NPART; p++) begin
      check(init_interrupt[p] == exp_int[p], $sformatf("interrupt p%0d exp %0b", p, exp_int[p]));
      check(init_fast_clear[p] == exp_fclr[p], $sformatf("fast clear p%0d exp %0b", p, exp_fclr[p]));
      check((gate_rise[p] >= 0) == exp_gate[p], $sformatf("gate p%0d exp %0b", p, exp_gate[p]));
      if (exp_gate[p]) begin
        // trigger sampled at the next edge, then standardizer, synchronizer,
        // 28-cycle delay and the gate register: 31 cycles
        check(gate_rise[p] - t0 == 32, $sformatf("gate p%0d at %0d", p, gate_rise[p] - t0));
        check(gate_len[p] == 50, $sformatf("gate p%0d width %0d", p, gate_len[p]));
      end
    end
    if (coupled_ev) begin
      evcount++;
      n_coupled++;
      if ((fl & COUPLED) != COUPLED) n_partial_coupled++;
    end
    if (fl[UNC]) n_uncoupled++;
    if (exp_int != '0) n_interrupt++;
    if (|(exp_fclr & fl & veto) && !gv) n_veto_fclr++;
    if (|(exp_int & fl & veto)) n_survivor++;
    if (gv && (exp_fclr != '0)) n_global++;
    if (fl == '0) n_no_trigger++;
    for (int p = 0; p < NPART; p++) if (exp_gate[p]) trans[p]++;

    check(busy == (exp_int | (coupled_ev ? COUPLED & ~exp_fclr : '0)) || exp_fclr != '0,
          "busy bits during the decision");
    // system busy blocks a second interaction while a coupled event is read out
    if ((exp_int & COUPLED) != '0) begin
      int s0;
      s0 = strobes;
      for (int p = 0; p < NPART; p++) if (COUPLED[p]) trig_a[p] = '1;
      interaction_trigger = 1; @(negedge clk); interaction_trigger = 0;
      repeat (80) @(negedge clk);
      trig_a = '0;
      check(strobes == s0, "no event strobe while system busy");
      check((gate & COUPLED) == '0, "no gate for a busy partition");
      n_busy_block++;
    end
    // let pulses end, then read out: clear the interrupted partitions
    repeat (300) @(negedge clk);
    if (exp_int != '0) begin
      vme(1, 1, CTRL | 16'h6, exp_int, rd);
      vme(1, 0, CTRL | 16'h8, 16'h0002, rd);
    end
    repeat (5) @(negedge clk);
    check(busy == '0 && !system_busy, $sformatf("all free after readout (busy %h)", busy));
    vme(0, 1, CTRL | 16'h4, 16'h0, rd);
    check(rd == 16'(evcount), $sformatf("event counter %0d exp %0d", rd, evcount));
    vme(0, 0, paddr(0, P_TRANS), 16'h0, rd);
    check(rd[7:0] == 8'(trans[0]), "transaction counter p0");
    if (exp_gate[0]) begin
      vme(0, 0, paddr(0, P_PATTERN), 16'h0, rd);
      check(rd[7:0] == acc[0], $sformatf("pattern p0 %h exp %h", rd[7:0], acc[0]));
    end
    repeat (130) @(negedge clk);
  endtask

  initial begin
    logic [15:0] rd;
    logic [NPART-1:0][NCOMP-1:0] comps;
    logic [NPART-1:0] veto;
    int s0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NPART; p++) begin
      trans[p] = 0;
      for (int c = 0; c < NCOMP; c++) begin factor[p][c] = 1; since[p][c] = 0; end
    end

    // configuration
    en = '0; ovr = '0;
    en[0] = 8'h03; en[1] = 8'h01; en[2] = 8'h01; en[3] = 8'h80; en[UNC] = 8'h05;
    ovr[2] = 8'h01;                      // partition 2 component 0 survives vetoes
    vme(1, 1, CTRL | 16'h0, COUPLED, rd);
    for (int p = 0; p < NPART; p++) begin
      vme(1, 0, paddr(p, P_ENABLE), 16'(en[p]), rd);
      vme(1, 0, paddr(p, P_VETO_OVR), 16'(ovr[p]), rd);
    end
    // prescale partition 1 component 0 by 3, uncoupled component 2 by 2
    factor[1][0] = 3;
    vme(1, 1, saddr(1, 0, 0), 16'h00FF, rd);
    vme(1, 1, saddr(1, 0, 2), 16'hFFFD, rd);
    factor[UNC][2] = 2;
    vme(1, 1, saddr(UNC, 2, 2), 16'hFFFE, rd);
    vme(0, 1, saddr(1, 0, 2), 16'h0, rd);
    check(rd == 16'hFFFD, "prescaler readback");
    vme(0, 1, CTRL | 16'h0, 16'h0, rd);
    check(rd == COUPLED, "Coupled readback");

    // directed events first, then random ones
    comps = '0; comps[0] = 8'h01;                 run_event(comps, '0, 0); // plain coupled
    comps = '0; comps[UNC] = 8'h01;               run_event(comps, '0, 0); // uncoupled
    comps = '0; comps[1] = 8'h01;                 run_event(comps, '0, 0); // prescaled
    veto = '0; veto[0] = 1;
    comps = '0; comps[0] = 8'h02;                 run_event(comps, veto, 0); // vetoed
    veto = '0; veto[2] = 1;
    comps = '0; comps[2] = 8'h01;                 run_event(comps, veto, 0); // survivor
    comps = '0; comps[2] = 8'h01;                 run_event(comps, '0, 1);   // global veto
    comps = '0; comps[UNC] = 8'h04;               run_event(comps, '0, 0);
    comps = '0; comps[UNC] = 8'h04; comps[0] = 1; run_event(comps, '0, 0);
    for (int e = 0; e < 40; e++) begin
      comps = '0;
      for (int p = 0; p < NPART; p++) comps[p] = NCOMP'($urandom) & NCOMP'($urandom);
      veto = NPART'($urandom) & NPART'($urandom);
      run_event(comps, veto, ($urandom_range(0, 7) == 0));
    end

    // independent dead times: the uncoupled partition stays busy (its
    // interrupt is not served) while a coupled event is taken
    begin
      logic [7:0] tc8;
      int gates8;
      vme(0, 0, paddr(UNC, P_TRANS), 16'h0, rd);
      tc8 = rd[7:0];
      trig_a = '0; trig_a[UNC] = 8'h01;
      interaction_trigger = 1; @(negedge clk); interaction_trigger = 0;
      repeat (60) @(negedge clk);
      trig_a = '0;
      repeat (1100) @(negedge clk);
      check(busy == (16'h1 << UNC) && !system_busy, "uncoupled partition alone busy");
      trig_a[UNC] = 8'h01; trig_a[0] = 8'h01;
      for (int p = 0; p < NPART; p++) gate_rise[p] = -1;
      interaction_trigger = 1; @(negedge clk); interaction_trigger = 0;
      repeat (60) @(negedge clk);
      trig_a = '0;
      repeat (40) @(negedge clk);
      gates8 = gate_rise[UNC];
      check(gate_rise[0] >= 0 && gate_rise[3] >= 0, "coupled event taken while the uncoupled one is busy");
      check(gates8 < 0, "busy uncoupled partition not gated");
      evcount++;
      for (int p = 0; p < 4; p++) trans[p]++;
      vme(0, 0, paddr(UNC, P_TRANS), 16'h0, rd);
      check(rd[7:0] == tc8 + 8'd1, "uncoupled transaction counter counted its own event only");
      repeat (1300) @(negedge clk);
      vme(1, 1, CTRL | 16'h6, COUPLED | (16'h1 << UNC), rd);
      vme(1, 0, CTRL | 16'h8, 16'h0002, rd);
      repeat (5) @(negedge clk);
      check(busy == '0 && !system_busy, "all free after the overlapping events");
      if (gate_rise[0] >= 0 && gates8 < 0) n_independent++;
      repeat (130) @(negedge clk);
    end

    // separation: a second interaction 60 ns after the first is dropped
    s0 = strobes;
    interaction_trigger = 1; @(negedge clk); interaction_trigger = 0;
    repeat (60) @(negedge clk);
    interaction_trigger = 1; @(negedge clk); interaction_trigger = 0;
    repeat (200) @(negedge clk);
    check(strobes == s0 + 1, "second trigger inside 125 ns dropped");
    if (strobes == s0 + 1) n_dropped++;

    // computer test: Pulse register of the uncoupled partition
    vme(1, 0, paddr(UNC, P_PULSE), 16'h0001, rd);
    repeat (200) @(negedge clk);
    vme(0, 0, paddr(UNC, P_PATTERN), 16'h0, rd);
    check(rd[7:0] == 8'h01 || rd[7:0] == 8'h05, $sformatf("test pulse pattern %h", rd[7:0]));
    if (rd[7:0] != 0) n_test++;
    repeat (1200) @(negedge clk);
    check(init_interrupt[UNC] || busy[UNC], "test event reaches the interrupt");

    $display("mechanisms: coupled=%0d (partial %0d) uncoupled=%0d prescale_reject=%0d busy_block=%0d",
             n_coupled, n_partial_coupled, n_uncoupled, n_prescale_reject, n_busy_block);
    $display("            veto_fast_clear=%0d survivor=%0d global_veto=%0d interrupt=%0d",
             n_veto_fclr, n_survivor, n_global, n_interrupt);
    $display("            no_trigger=%0d dropped=%0d test_pulse=%0d independent_dead_time=%0d",
             n_no_trigger, n_dropped, n_test, n_independent);
    check(n_coupled > 0, "coupled event seen");
    check(n_partial_coupled > 0, "coupled gate without own trigger seen");
    check(n_uncoupled > 0, "uncoupled event seen");
    check(n_prescale_reject > 0, "prescale rejection seen");
    check(n_busy_block > 0, "busy blocking seen");
    check(n_veto_fclr > 0, "veto fast clear seen");
    check(n_survivor > 0, "veto survivor seen");
    check(n_global > 0, "global veto seen");
    check(n_interrupt > 0, "interrupt seen");
    check(n_dropped > 0, "separation drop seen");
    check(n_test > 0, "test pulse seen");
    check(n_independent > 0, "independent dead times seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
