// tb_first_level_coupler: exhaustive check of the coupling logic. A coupled
// partition drives its first-level onto the backplane line and listens to
// the line; an uncoupled one stays off the line and uses its own decision.
`timescale 1ns/1ps
module tb_first_level_coupler;
  logic x_first_level, coupled, system_first_level, drive, xsys_first_level;
  int checks = 0, failures = 0;

  first_level_coupler dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x_first_level, coupled, system_first_level} = 3'(v);
      #1;
      checks += 2;
      if (drive !== (coupled && x_first_level)) begin failures++; $display("drive v=%0d", v); end
      if (xsys_first_level !== (coupled ? system_first_level : x_first_level)) begin
        failures++; $display("xsys v=%0d", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
