// prescaler24: out-of-line prescaler of one trigger component (the
// "3 x LS593 24-bit scaler" of the partition module).
//
// It holds a preset register and a counter. The counter advances on the
// trailing edge of each gated trigger that was not accepted, provided the
// partition is not busy at that edge. Its overflow output is high while the
// counter is all ones. A trigger whose leading edge finds overflow high is
// accepted for its whole length, and its trailing edge presets the counter
// from the preset register, starting the next scale-down sequence. A
// trigger that starts while the partition is busy is never accepted. Writing
// the preset (byte enables, from the host) also loads the counter with the
// new value, so a new factor takes effect at once.
//
// With preset P the factor is N = 2**W - P: P = all ones accepts every
// trigger (N = 1), P = 0 accepts one in 2**24. This covers the 1 .. 2**24
// range of the design. The split into preset register plus counter follows
// the LS593 parts named for this block. The overflow flag is qualified by
// the partition not being busy (the O'FLOW.BUSY gate input of the design), so
// a trigger that starts after an event has made the partition busy is
// neither accepted nor counted. The exact encoding of the factor,
// the busy inhibit at the trailing edge and loading on write are this
// model's choices. After reset both registers hold all ones (factor 1).
//
// Timing: accept is combinational from trig and registered state, so the
// accepted trigger passes with no added cycle (the prescaler is not in line
// with the trigger, only its overflow flag is).
module prescaler24 #(
  parameter int unsigned W = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         trig,      // gated trigger component
  input  logic         busy,      // partition busy: inhibits counting
  input  logic [W-1:0] wr_data,   // host write data (LOAD)
  input  logic [W-1:0] wr_mask,   // bits written
  output logic [W-1:0] preset,
  output logic [W-1:0] count,
  output logic         overflow,  // O'FLOW
  output logic         accept     // trigger accepted (FIRST-LEVEL of this component)
);
  logic trig_q, acc_q, rise, fall;

  assign rise     = trig && !trig_q;
  assign fall     = !trig && trig_q;
  assign overflow = &count;
  assign accept   = trig && (rise ? (overflow && !busy) : acc_q);

  logic [W-1:0] preset_nx;
  assign preset_nx = (preset & ~wr_mask) | (wr_data & wr_mask);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_q <= 1'b0;
      acc_q  <= 1'b0;
      preset <= '1;
      count  <= '1;
    end else begin
      trig_q <= trig;
      acc_q  <= accept;
      preset <= preset_nx;
      if (|wr_mask)           count <= preset_nx;
      else if (fall && acc_q) count <= preset;
      else if (fall && !busy) count <= count + 1'b1;
    end
  end
endmodule
