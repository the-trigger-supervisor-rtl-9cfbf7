// tb_busy_synchronizer: random standardized pulses and random busy set /
// clear events. The model decides at each pulse's leading edge whether the
// pulse passes (busy latch clear) and expects the whole pulse, one cycle
// late, on the strobe; it also follows the latch itself.
`timescale 1ns/1ps
module tb_busy_synchronizer;
  logic clk = 0, rst_n = 0, pulse_in = 0, busy_set = 0, busy_clr = 0;
  logic busy, strobe;
  int checks = 0, failures = 0;
  int passed = 0, blocked = 0, mid_set = 0, mid_clr = 0;

  busy_synchronizer dut (.*);

  always #0.5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic m_busy = 0, m_pass = 0, m_pulse_q = 0, m_strobe = 0;

  always @(posedge clk) if (rst_n) begin
    if (pulse_in && !m_pulse_q) begin
      m_pass = !m_busy;
      if (m_pass) passed++; else blocked++;
    end
    if (pulse_in && m_pulse_q && m_pass && busy_set)  mid_set++;
    if (pulse_in && m_pulse_q && !m_pass && busy_clr && m_busy) mid_clr++;
    m_strobe  = pulse_in && m_pass;
    m_pulse_q = pulse_in;
    if (busy_set) m_busy = 1; else if (busy_clr) m_busy = 0;
  end

  always @(negedge clk) if (rst_n) begin
    checks += 2;
    if (strobe !== m_strobe) begin failures++; $display("%t strobe %0b exp %0b", $time, strobe, m_strobe); end
    if (busy !== m_busy) begin failures++; $display("%t busy %0b exp %0b", $time, busy, m_busy); end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      for (int i = 0; i < 300; i++) begin
        repeat ($urandom_range(5, 80)) @(negedge clk);
        pulse_in = 1;
        repeat (50) @(negedge clk);
        pulse_in = 0;
      end
      for (int i = 0; i < 1500; i++) begin
        repeat ($urandom_range(1, 30)) @(negedge clk);
        if ($urandom_range(0, 1) != 0) busy_set = 1; else busy_clr = 1;
        @(negedge clk);
        busy_set = 0; busy_clr = 0;
      end
    join_any
    disable fork;
    repeat (60) @(negedge clk);
    checks++;
    if (passed < 20 || blocked < 20 || mid_set < 5 || mid_clr < 5) begin
      failures++;
      $display("coverage: passed=%0d blocked=%0d mid_set=%0d mid_clr=%0d", passed, blocked, mid_set, mid_clr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
