// trigger_component: one of the eight trigger components of a partition
// module, from its two inputs to its first-level contribution.
//
// Three levels of gating, as in the partition module's first-level logic:
//   1. coincidence of the two component inputs A and B (S3 = A and B). B is
//      the optional input; a board without it ties b high, which is the
//      "defaults to TRUE" of the design;
//   2. the computer enable and the EVENT STROBE (the trigger must fall
//      inside a strobe, which also carries the busy gating);
//   3. the prescaler, whose overflow flag lets a trigger through
//      (S4, this component's FIRST-LEVEL).
// A test pulse from the Pulse register forces both inputs true, so a pulse
// produces a simulated trigger in every enabled component.
//
// S1..S4 are the monitor points of the component (A, B, A and B, accepted).
// All outputs are combinational from the inputs and the prescaler state.
module trigger_component #(
  parameter int unsigned W = ts_pkg::PRESCALE_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         a,
  input  logic         b,
  input  logic         test,        // simulated trigger from the Pulse register
  input  logic         enable,      // computer enable
  input  logic         strobe,      // EVENT STROBE
  input  logic         busy,        // partition busy (prescaler count inhibit)
  input  logic [W-1:0] wr_data,     // prescaler write
  input  logic [W-1:0] wr_mask,
  output logic [W-1:0] preset,
  output logic [W-1:0] count,
  output logic         s1,
  output logic         s2,
  output logic         s3,
  output logic         gated,       // after the second level of gating
  output logic         overflow,    // O'FLOW of the prescaler
  output logic         first_level  // S4
);
  assign s1    = a | test;
  assign s2    = b | test;
  assign s3    = s1 & s2;
  assign gated = s3 & enable & strobe;

  prescaler24 #(.W(W)) u_prescaler (
    .clk, .rst_n,
    .trig    (gated),
    .busy,
    .wr_data, .wr_mask,
    .preset, .count,
    .overflow,
    .accept  (first_level)
  );
endmodule
