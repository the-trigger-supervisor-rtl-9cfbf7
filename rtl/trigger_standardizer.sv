// trigger_standardizer: width and separation standardizer of the control
// module (the first box of the event strobe chain).
//
// A rising edge of the interaction trigger starts an output pulse of exactly
// WIDTH clock cycles. A new pulse may start only SEP cycles or more after the
// start of the previous one; edges arriving earlier are ignored, not
// delayed. The output is registered: it rises one cycle after the input
// edge is sampled.
//
// The 50 ns width and the 125 ns minimum separation are the design's
// figures. Counting the separation from leading edge to leading edge, and
// dropping (not postponing) a too-early trigger, are choices of this model.
// The NIM-to-ECL receiver in front of this block is a level translator and
// is not modelled; trig_in is assumed already synchronous to clk.
module trigger_standardizer #(
  parameter int unsigned WIDTH = 50,   // output pulse width, cycles
  parameter int unsigned SEP   = 125   // minimum start-to-start spacing, cycles
) (
  input  logic clk,
  input  logic rst_n,
  input  logic trig_in,
  output logic pulse_out
);
  localparam int unsigned CW = $clog2(SEP + 1);

  logic          trig_q;
  logic [CW-1:0] age;      // cycles since the last accepted start, saturating
  logic          ready;

  assign ready = (age >= CW'(SEP - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_q    <= 1'b0;
      age       <= CW'(SEP - 1);
      pulse_out <= 1'b0;
    end else begin
      trig_q <= trig_in;
      if (trig_in && !trig_q && ready) begin
        age       <= '0;
        pulse_out <= 1'b1;
      end else begin
        if (!ready) age <= age + 1'b1;
        if (age >= CW'(WIDTH - 1)) pulse_out <= 1'b0;
      end
    end
  end

  initial begin
    assert (WIDTH >= 1 && SEP > WIDTH)
      else $error("trigger_standardizer: need 1 <= WIDTH < SEP");
  end
endmodule
