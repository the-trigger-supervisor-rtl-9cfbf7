// busy_synchronizer: busy latch and event strobe gate of the control module.
//
// The busy latch is set by busy_set (SET SYSTEM BUSY, i.e. a first-level
// trigger) and cleared by busy_clr (CLEAR SYSTEM BUSY); set wins when both
// arrive together. A standardized pulse is passed on as the event strobe
// only if the latch is clear when the pulse starts, and once passed it is
// passed whole: setting busy in the middle of a pulse does not cut it short,
// and clearing busy in the middle of a pulse does not let out its tail. The
// strobe is registered and follows pulse_in by one cycle with the same width.
//
// Busy latch plus whole-pulse gating is the function the design asks of
// this block; the circuit used here (a pass flag sampled at the leading
// edge) is this model's own.
module busy_synchronizer (
  input  logic clk,
  input  logic rst_n,
  input  logic pulse_in,    // standardized interaction trigger
  input  logic busy_set,
  input  logic busy_clr,
  output logic busy,
  output logic strobe       // EVENT STROBE
);
  logic pulse_q, pass_q, start, pass_now;

  assign start    = pulse_in && !pulse_q;
  assign pass_now = start ? !busy : pass_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pulse_q <= 1'b0;
      pass_q  <= 1'b0;
      strobe  <= 1'b0;
      busy    <= 1'b0;
    end else begin
      pulse_q <= pulse_in;
      pass_q  <= pulse_in && pass_now;
      strobe  <= pulse_in && pass_now;
      if (busy_set)      busy <= 1'b1;
      else if (busy_clr) busy <= 1'b0;
    end
  end
endmodule
