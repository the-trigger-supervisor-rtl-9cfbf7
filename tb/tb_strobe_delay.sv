// tb_strobe_delay: the input is driven just after each clock edge, as the
// registered event strobe is. The output must follow the input exactly
// DELAY (28) cycles later, bit for bit, and a single rising edge must
// reappear 28 ns later.
`timescale 1ns/1ps
module tb_strobe_delay;
  localparam int DELAY = 28;
  logic clk = 0, rst_n = 0, d = 0, q;
  int checks = 0, failures = 0;
  logic hist [$];

  strobe_delay dut (.*);

  always #0.5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t_in, t_out;
    repeat (2) @(posedge clk);
    #0.1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk);
      #0.1;
      hist.push_back(d);          // value held before this edge
      if (hist.size() > DELAY) begin
        checks++;
        // q after this edge equals the value that was on d DELAY cycles ago
        if (q !== hist[hist.size() - DELAY]) begin
          failures++;
          if (failures < 10) $display("%t q=%0b expected %0b", $time, q, hist[hist.size() - DELAY]);
        end
      end
      d = 1'($urandom_range(0, 1));
    end
    d = 0;
    repeat (DELAY + 5) @(posedge clk);
    #0.1 d = 1; t_in = $realtime - 0.1;  // the edge after which d changed
    @(posedge q); t_out = $realtime;
    checks++;
    if (t_out - t_in < DELAY - 0.01 || t_out - t_in > DELAY + 0.01) begin
      failures++; $display("delay %f ns", t_out - t_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
