// tb_trigger_standardizer: random interaction triggers against a timestamp
// model of the standardizer (start only on a rising edge at least SEP
// cycles after the previous start, output high WIDTH cycles, one cycle
// after the edge). Also measures every output pulse width and spacing.
`timescale 1ns/1ps
module tb_trigger_standardizer;
  localparam int WIDTH = 50, SEP = 125;
  logic clk = 0, rst_n = 0, trig_in = 0, pulse_out;
  int checks = 0, failures = 0, cyc = 0;

  trigger_standardizer dut (.*);

  always #0.5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  int     last_start = -1000;
  logic   trig_q = 0, exp_out = 0;
  int     pulses = 0, rise_t = 0, prev_rise = -1000, dropped = 0;
  logic   out_q = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (trig_in && !trig_q) begin
      if (cyc - last_start >= SEP) last_start = cyc;
      else dropped++;
    end
    trig_q  = trig_in;
    exp_out = (cyc - last_start) < WIDTH;
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (pulse_out !== exp_out) begin
      failures++;
      if (failures < 10) $display("cycle %0d: pulse_out=%0b expected %0b", cyc, pulse_out, exp_out);
    end
    if (pulse_out && !out_q) begin
      checks++;
      if (cyc - prev_rise < SEP) begin failures++; $display("spacing %0d", cyc - prev_rise); end
      prev_rise = cyc; rise_t = cyc; pulses++;
    end
    if (!pulse_out && out_q) begin
      checks++;
      if (cyc - rise_t != WIDTH) begin failures++; $display("width %0d", cyc - rise_t); end
    end
    out_q = pulse_out;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      // mixture of short, long, close and far triggers
      repeat (1 + $urandom_range(0, 3) * $urandom_range(0, 60)) @(negedge clk);
      trig_in = 1;
      repeat (1 + $urandom_range(0, 80)) @(negedge clk);
      trig_in = 0;
    end
    repeat (200) @(negedge clk);
    checks++;
    if (pulses < 50 || dropped < 20) begin
      failures++;
      $display("too few cases: pulses=%0d dropped=%0d", pulses, dropped);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
