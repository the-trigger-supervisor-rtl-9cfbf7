// tb_control_module: register access, address decoding, busy bookkeeping
// and the event strobe chain of the control module, with the partition
// boards replaced by a simple responder (one board at slot 3).
`timescale 1ns/1ps
module tb_control_module;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0, interaction_trigger = 0;
  vme_req_t req = '0;
  vme_rsp_t rsp;
  local_req_t lreq;
  logic part_hit;
  logic [15:0] part_rdata;
  logic std_pulse, event_strobe, delayed_event_strobe, system_busy;
  logic [NPART-1:0] coupled, busy, busy_clr, x_first_level = '0, fast_clear_done = '0;
  logic system_first_level = 0;
  logic [15:0] event_count;
  int checks = 0, failures = 0;

  control_module dut (.*);

  // board 3 answers every offset with {offset, select kind}
  assign part_hit   = lreq.valid && lreq.board == 4'd3;
  assign part_rdata = {8'hB3, 1'b0, lreq.scaler_sel, lreq.partition_sel, lreq.offset};

  always #0.5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("%t FAIL %s", $time, what); end
  endtask

  task automatic access(input logic wr, input logic word, input logic [15:0] addr,
                        input logic [15:0] wdata, input logic [5:0] am,
                        output logic ack, output logic [15:0] rdata);
    @(negedge clk);
    req = '{valid: 1'b1, write: wr, word: word, am: am, addr: addr, wdata: wdata};
    @(negedge clk);
    req = '0;
    ack = rsp.ack; rdata = rsp.rdata;
  endtask

  logic ack;
  logic [15:0] rd;
  localparam logic [15:0] CTRL = 16'h0210;  // A09 = 1, A04 = 1

  initial begin
    int t0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // control registers, word and byte
    access(1, 1, CTRL | 16'h0, 16'h00F0, AM_SHORT_USER, ack, rd);
    check(ack && coupled == 16'h00F0, "Coupled word write");
    access(1, 0, CTRL | 16'h0, 16'h0081, AM_SHORT_SUPV, ack, rd);
    check(ack && coupled == 16'h81F0, "Coupled high byte write");
    access(0, 1, CTRL | 16'h0, 16'h0, AM_SHORT_USER, ack, rd);
    check(ack && rd == 16'h81F0, "Coupled word read");
    access(0, 0, CTRL | 16'h1, 16'h0, AM_SHORT_USER, ack, rd);
    check(ack && rd == 16'h00F0, "Coupled low byte read");
    access(0, 1, CTRL | 16'h0, 16'h0, 6'h39, ack, rd);
    check(!ack, "wrong address modifier ignored");
    access(0, 1, CTRL | 16'h0400, 16'h0, AM_SHORT_USER, ack, rd);
    check(!ack, "outside the 1024-byte window ignored");

    // Set-Clear Select and Function byte
    access(1, 1, CTRL | 16'h6, 16'h0015, AM_SHORT_USER, ack, rd);
    access(1, 0, CTRL | 16'h8, 16'h0001, AM_SHORT_USER, ack, rd);
    check(busy == 16'h0015, "Function set");
    access(1, 1, CTRL | 16'h6, 16'h0005, AM_SHORT_USER, ack, rd);
    access(1, 0, CTRL | 16'h8, 16'h0002, AM_SHORT_USER, ack, rd);
    check(busy == 16'h0010, "Function clear");
    check(busy_clr == 16'h0005, "X BUSY CLR pulses for the cleared bits");
    access(0, 1, CTRL | 16'h2, 16'h0, AM_SHORT_USER, ack, rd);
    check(rd == 16'h0010, "Busy read");
    access(1, 1, CTRL | 16'h6, 16'h0010, AM_SHORT_USER, ack, rd);
    access(1, 0, CTRL | 16'h8, 16'h0002, AM_SHORT_USER, ack, rd);
    check(busy == 16'h0000, "all clear");

    // partition decoding: board 3 present, board 4 absent
    access(0, 0, 16'h0000 | (3 << 5) | 16'h0A, 16'h0, AM_SHORT_USER, ack, rd);
    check(ack && rd == {8'hB3, 3'b010, 5'h0A}, "scaler select, board 3");
    access(0, 0, 16'h0200 | (3 << 5) | 16'h03, 16'h0, AM_SHORT_USER, ack, rd);
    check(ack && rd == {8'hB3, 3'b001, 5'h03}, "partition select, board 3");
    access(0, 0, 16'h0200 | (4 << 5) | 16'h03, 16'h0, AM_SHORT_USER, ack, rd);
    check(!ack, "no board 4: no answer");

    // event strobe chain with coupled partitions 4..7, 15 (0x81F0)
    @(negedge clk);
    interaction_trigger = 1; t0 = 0;
    @(negedge clk); interaction_trigger = 0;
    while (!event_strobe) begin @(negedge clk); t0++; end
    check(t0 == 1, $sformatf("event strobe %0d cycles after the standardized pulse", t0));
    t0 = 0;
    while (!delayed_event_strobe) begin @(negedge clk); t0++; end
    check(t0 == 28, $sformatf("delayed strobe %0d cycles after the strobe", t0));
    t0 = 0;
    while (delayed_event_strobe) begin @(negedge clk); t0++; end
    check(t0 == 50, "strobe width 50");

    // coupled first level: system busy, coupled busy bits, event counter
    repeat (200) @(negedge clk);
    interaction_trigger = 1;
    @(negedge clk); interaction_trigger = 0;
    repeat (3) @(negedge clk);
    system_first_level = 1;
    @(negedge clk);
    system_first_level = 0;
    @(negedge clk);
    system_first_level = 1;   // trailing-edge glitch of the wired-OR line
    @(negedge clk);
    system_first_level = 0;
    check(system_busy && busy == 16'h81F0, "coupled event sets system busy and the coupled bits");
    check(event_count == 16'd1, "event counter, glitch not counted");
    // next interaction trigger gives no strobe
    repeat (200) @(negedge clk);
    interaction_trigger = 1;
    @(negedge clk); interaction_trigger = 0;
    t0 = 0;
    repeat (80) begin @(negedge clk); if (event_strobe) t0++; end
    check(t0 == 0, "no strobe while busy");
    // uncoupled partition 2 first level
    x_first_level[2] = 1; @(negedge clk); x_first_level[2] = 0; @(negedge clk);
    check(busy == 16'h81F4, "uncoupled first level sets its own bit");
    // fast clear of the coupled partitions except 15, then 15
    fast_clear_done = 16'h80F0; @(negedge clk); fast_clear_done = '0;
    @(negedge clk);
    check(system_busy && busy == 16'h0104, "system busy holds while a coupled bit remains");
    fast_clear_done = 16'h0100; @(negedge clk); fast_clear_done = '0;
    repeat (2) @(negedge clk);
    check(!system_busy && busy == 16'h0004, "system busy released");
    // event counter write and read
    access(1, 1, CTRL | 16'h4, 16'h1234, AM_SHORT_USER, ack, rd);
    access(0, 1, CTRL | 16'h4, 16'h0, AM_SHORT_USER, ack, rd);
    check(rd == 16'h1234, "event counter preset");
    // Pulse register write fires a test trigger
    repeat (200) @(negedge clk);
    access(1, 0, 16'h0200 | (3 << 5) | 16'h04, 16'h0001, AM_SHORT_USER, ack, rd);
    t0 = 0;
    repeat (5) begin @(negedge clk); if (event_strobe) t0++; end
    check(t0 > 0, "test trigger from the Pulse register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
