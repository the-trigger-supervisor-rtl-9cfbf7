// tb_prescale_million: the rare-trigger case of the design, a beam trigger
// scaled down by 10^6. One trigger component is programmed with preset
// 2**24 - 10**6 and fed 2,000,000 single-cycle triggers inside a permanent
// strobe. Exactly triggers number 1,000,000 and 2,000,000 must be
// accepted, and no other.
`timescale 1ns/1ps
module tb_prescale_million;
  localparam int W = 24;
  localparam int N = 1_000_000;
  logic clk = 0, rst_n = 0;
  logic a = 0, b = 1, test = 0, enable = 1, strobe = 1, busy = 0;
  logic [W-1:0] wr_data = '0, wr_mask = '0, preset, count;
  logic s1, s2, s3, gated, overflow, first_level;
  int checks = 0, failures = 0;

  trigger_component dut (.*);

  always #0.5 clk = ~clk;

  initial begin : watchdog
    repeat (5 * 2 * N) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int accepted_at [$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    wr_data = W'((1 << W) - N); wr_mask = '1;
    @(negedge clk);
    wr_mask = '0;
    for (int t = 1; t <= 2 * N; t++) begin
      a = 1;
      #0.1 if (first_level) accepted_at.push_back(t);
      @(negedge clk);
      a = 0;
      @(negedge clk);
    end
    checks++;
    if (accepted_at.size() != 2) begin
      failures++; $display("accepted %0d times", accepted_at.size());
    end
    foreach (accepted_at[i]) begin
      checks++;
      if (accepted_at[i] != (i + 1) * N) begin
        failures++; $display("accepted trigger %0d", accepted_at[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
