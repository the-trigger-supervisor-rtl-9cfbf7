// tb_prescaler24: for a set of prescale factors N (preset 2**24 - N) a train
// of triggers of random length is applied; exactly every N-th trigger must be
// accepted, for its whole length. Triggers whose trailing edge falls while
// busy must not advance the count. Also checks byte-wise preset writes and
// the 1 in 2**24 end of the range (no acceptance in the first triggers).
// A trigger that starts while busy is never accepted.
`timescale 1ns/1ps
module tb_prescaler24;
  localparam int W = 24;
  logic clk = 0, rst_n = 0, trig = 0, busy = 0;
  logic [W-1:0] wr_data = '0, wr_mask = '0, preset, count;
  logic overflow, accept;
  int checks = 0, failures = 0, n_accept = 0, n_busy = 0;

  prescaler24 dut (.*);

  always #0.5 clk = ~clk;

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 15) $display("%t FAIL %s", $time, what); end
  endtask

  task automatic write_factor(input int unsigned n);
    @(negedge clk);
    wr_data = W'((1 << W) - n); wr_mask = '1;
    @(negedge clk);
    wr_mask = '0;
  endtask

  // one trigger; returns whether it was accepted, checks it is whole
  task automatic pulse(input logic bsy, output logic acc);
    int len;
    len = $urandom_range(1, 6);
    @(negedge clk);
    trig = 1; busy = bsy;
    #0.1 acc = accept;
    for (int i = 1; i < len; i++) begin
      @(negedge clk);
      check(accept == acc, "accept changed inside a trigger");
    end
    @(negedge clk);
    trig = 0;
    repeat ($urandom_range(1, 3)) @(negedge clk);
    busy = 0;
  endtask

  initial begin
    logic acc, bsy;
    static int unsigned factors [] = '{1, 2, 3, 5, 7, 16, 100};
    repeat (2) @(negedge clk);
    rst_n = 1;
    // reset value: factor 1
    check(preset == '1 && count == '1, "reset values");
    foreach (factors[f]) begin
      int unsigned n;
      int since;
      n = factors[f];
      since = 0;
      write_factor(n);
      check(preset == W'((1 << W) - n), "preset readback");
      for (int t = 0; t < 6 * n + 20; t++) begin
        bsy = ($urandom_range(0, 5) == 0) && (since != n - 1);
        pulse(bsy, acc);
        if (bsy) begin
          n_busy++;
          check(acc == (since == n - 1), "busy trigger");
        end else begin
          check(acc == (since == n - 1), $sformatf("factor %0d trigger %0d", n, t));
          since = acc ? 0 : since + 1;
          if (acc) n_accept++;
        end
      end
    end
    // overflow reached but partition busy: not accepted, not counted; the
    // next trigger after busy goes away is accepted
    write_factor(2);
    pulse(1'b0, acc);
    check(!acc && overflow, "factor 2: first rejected, overflow now set");
    pulse(1'b1, acc);
    check(!acc && overflow, "busy blocks an overflowed trigger and it is not counted");
    pulse(1'b0, acc);
    check(acc, "accepted once not busy");
    // byte-wise write: bits 15:8 only
    @(negedge clk);
    wr_data = 24'h00AB00; wr_mask = 24'h00FF00;
    @(negedge clk);
    wr_mask = '0;
    check(preset == 24'hFFABFE, "byte write");
    // largest factor: preset 0, nothing accepted in the first 2000 triggers
    write_factor(1 << W);
    check(preset == '0, "preset for 2**24");
    for (int t = 0; t < 2000; t++) begin
      pulse(1'b0, acc);
      if (acc) check(1'b0, "accept with factor 2**24");
    end
    check(count == 24'd2000, "count after 2000 triggers");
    check(n_accept > 40 && n_busy > 30, $sformatf("coverage accept=%0d busy=%0d", n_accept, n_busy));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
