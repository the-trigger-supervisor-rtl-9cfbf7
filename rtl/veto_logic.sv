// veto_logic: second-level veto logic of one partition module.
//
// X VOTE is set by the rising edge of X FIRST-LEVEL and cleared by any of:
// the front panel X VETO (unless a veto survivor took part in the event),
// the clearing of this partition's busy bit (X BUSY CLR), or the end of the
// interrupt pulse (X INTERRUPT + 250 ns). A coupled partition drives X VOTE
// onto the wired-OR SYSTEM VOTE line. DECISION cycles (1 us) after the
// rising edge of X/SYSTEM FIRST-LEVEL the outstanding votes are sampled:
// SYSTEM VOTE for a coupled partition, X VOTE for an uncoupled one. If any
// is outstanding INITIATE X INTERRUPT is raised for the readout processor,
// otherwise INITIATE X FAST CLEAR is raised for the front end. GLOBAL VETO,
// present at the decision, forces the fast clear whatever the votes.
//
// The survivor flag (the DISABLE VETO level) is set when an accepted trigger
// component marked as veto survivor fires and is cleared with the vote.
// A veto and a vote set in the same cycle: the veto wins, like the direct
// clear of the latch it drives. Rising edges of X/SYSTEM FIRST-LEVEL during
// a pending decision or its outcome pulse are ignored, which makes the
// logic insensitive to glitches on the trailing edge of the backplane line,
// as the design requires; the way it is done is this model's own.
//
// The 1 us decision time and the 250 ns interrupt-to-clear time are the
// design's. The pulse length of the fast clear (FCLR_LEN, 250 ns by
// default) and the fast_clear_done pulse at its end, which the control
// module uses to clear the partition's busy bit, are this model's choices.
module veto_logic #(
  parameter int unsigned DECISION = 1000,  // first-level to decision, cycles
  parameter int unsigned INT_LEN  = 250,   // interrupt pulse, then vote clear
  parameter int unsigned FCLR_LEN = 250    // fast clear pulse length
) (
  input  logic clk,
  input  logic rst_n,
  input  logic x_first_level,
  input  logic xsys_first_level,
  input  logic survivor_hit,     // an accepted veto-survivor component
  input  logic x_veto,           // front panel X VETO
  input  logic busy_clr,         // X BUSY CLR pulse
  input  logic coupled,
  input  logic system_vote,      // backplane wired-OR value
  input  logic global_veto,
  output logic x_vote,
  output logic vote_drive,       // contribution to SYSTEM VOTE
  output logic survivor,         // DISABLE VETO
  output logic init_interrupt,
  output logic init_fast_clear,
  output logic fast_clear_done   // one-cycle pulse at the end of the fast clear
);
  localparam int unsigned DW = $clog2(DECISION + 1);
  localparam int unsigned PW = $clog2((INT_LEN > FCLR_LEN ? INT_LEN : FCLR_LEN) + 1);

  logic          xfl_q, xsys_q;
  logic          timing;           // 1 us delay running
  logic [DW-1:0] dcount;
  logic [PW-1:0] pcount;
  logic          int_end, fclr_end, decide, outstanding, disable_veto, vote_clr;
  logic          busy_window;      // decision pending or its outcome running

  // The 1 us delay is started only by a first-level edge outside an event in
  // progress: trailing-edge glitches of the wired-OR line do not restart it.
  assign busy_window  = timing || init_interrupt || init_fast_clear;

  assign disable_veto = survivor | survivor_hit;
  assign int_end      = init_interrupt  && (pcount == PW'(INT_LEN - 1));
  assign fclr_end     = init_fast_clear && (pcount == PW'(FCLR_LEN - 1));
  assign decide       = timing && (dcount == DW'(DECISION - 1));
  assign outstanding  = (coupled ? system_vote : x_vote) && !global_veto;
  assign vote_clr     = (x_veto && !disable_veto) || busy_clr || int_end;
  assign vote_drive   = x_vote & coupled;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xfl_q           <= 1'b0;
      xsys_q          <= 1'b0;
      x_vote          <= 1'b0;
      survivor        <= 1'b0;
      timing          <= 1'b0;
      dcount          <= '0;
      pcount          <= '0;
      init_interrupt  <= 1'b0;
      init_fast_clear <= 1'b0;
      fast_clear_done <= 1'b0;
    end else begin
      xfl_q  <= x_first_level;
      xsys_q <= xsys_first_level;

      if (vote_clr)                         x_vote <= 1'b0;
      else if (x_first_level && !xfl_q)     x_vote <= 1'b1;

      if (busy_clr || int_end || fclr_end)  survivor <= 1'b0;
      else if (survivor_hit)                survivor <= 1'b1;

      if (xsys_first_level && !xsys_q && !busy_window) begin
        timing <= 1'b1;
        dcount <= '0;
      end else if (decide) begin
        timing <= 1'b0;
      end else if (timing) begin
        dcount <= dcount + 1'b1;
      end

      fast_clear_done <= fclr_end;
      if (decide) begin
        init_interrupt  <= outstanding;
        init_fast_clear <= !outstanding;
        pcount          <= '0;
      end else begin
        if (init_interrupt || init_fast_clear) pcount <= pcount + 1'b1;
        if (int_end)  init_interrupt  <= 1'b0;
        if (fclr_end) init_fast_clear <= 1'b0;
      end
    end
  end
endmodule
