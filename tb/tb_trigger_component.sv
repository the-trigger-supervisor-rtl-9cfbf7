// tb_trigger_component: checks the three gating levels of one component.
// Random A, B, test, enable and strobe levels are compared every cycle with
// the expected S1, S2, S3 and gated outputs; with prescale factor 1 the
// first-level output must equal the gated trigger, with factor 3 only every
// third gated pulse may pass.
`timescale 1ns/1ps
module tb_trigger_component;
  localparam int W = 24;
  logic clk = 0, rst_n = 0;
  logic a = 0, b = 0, test = 0, enable = 0, strobe = 0, busy = 0;
  logic [W-1:0] wr_data = '0, wr_mask = '0, preset, count;
  logic s1, s2, s3, gated, overflow, first_level;
  int checks = 0, failures = 0, n_gated = 0, n_fl = 0;

  trigger_component dut (.*);

  always #0.5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 15) $display("%t FAIL %s", $time, what); end
  endtask

  initial begin
    logic g, prev_g;
    int gated_pulses, passed;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // level checks, factor 1
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      a = 1'($urandom); b = 1'($urandom); test = ($urandom_range(0, 7) == 0);
      enable = ($urandom_range(0, 3) != 0); strobe = 1'($urandom);
      #0.1;
      g = ((a & b) | test) & enable & strobe;
      check(s1 == (a | test) && s2 == (b | test) && s3 == ((a & b) | test), "S1..S3");
      check(gated == g, "gated");
      check(first_level == g, "factor 1 passes every trigger");
      if (g) n_gated++;
      if (first_level) n_fl++;
    end
    // factor 3: count gated pulses and accepted pulses
    @(negedge clk);
    a = 0; b = 0; test = 0; enable = 1; strobe = 1;
    wr_data = W'((1 << W) - 3); wr_mask = '1;
    @(negedge clk);
    wr_mask = '0;
    gated_pulses = 0; passed = 0;
    for (int i = 0; i < 30; i++) begin
      a = 1; b = 1;
      #0.1;
      gated_pulses++;
      check(first_level == (gated_pulses % 3 == 0), $sformatf("factor 3, pulse %0d", gated_pulses));
      if (first_level) passed++;
      repeat (2) @(negedge clk);
      a = 0;
      repeat (2) @(negedge clk);
    end
    check(passed == 10, "10 of 30 passed");
    check(n_gated > 100 && n_fl > 100, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
