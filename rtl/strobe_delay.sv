// strobe_delay: fixed delay line that turns EVENT STROBE into DELAYED EVENT
// STROBE on the control module.
//
// A shift register of DELAY stages: the output is the input DELAY clock
// cycles earlier, edge for edge. With the 1 ns clock assumed throughout, the
// default of 28 stages is the 28 ns delay of the design. The delay gives the
// partition modules time to form their first-level decision before the
// gates are timed from this common edge, which is what keeps the gate start
// independent of the partition and component that caused the event.
module strobe_delay #(
  parameter int unsigned DELAY = 28  // cycles, >= 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic [DELAY:0] sr;  // sr[0] is the input, sr[k] the input k cycles ago

  assign sr[0] = d;

  for (genvar k = 1; k <= DELAY; k++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) sr[k] <= 1'b0;
      else        sr[k] <= sr[k-1];
    end
  end

  assign q = sr[DELAY];

  initial assert (DELAY >= 1) else $error("strobe_delay: DELAY must be >= 1");
endmodule
