// trigger_supervisor: the complete trigger supervisor crate, one control
// module and NPART partition modules joined by the P2 backplane lines.
//
// Each partition collects up to eight first-level trigger components from
// one detector subsystem. Coupled partitions share one dead time: a
// first-level trigger from any of them raises SYSTEM FIRST-LEVEL, sets system
// busy and opens the gates of all of them on the same DELAYED EVENT STROBE.
// Uncoupled partitions run alone with their own busy bit. One microsecond
// after the first-level trigger each partition either starts a readout
// interrupt (votes outstanding) or a fast clear of its front end (all votes
// withdrawn by vetoes, or a global veto), the fast clear also freeing its
// busy bit. The host sets everything up through the register window.
//
// The backplane wired-OR lines (SYSTEM FIRST-LEVEL, SYSTEM VOTE, and the
// read-data bus) are OR reductions here. Partition board p has geographic
// address p. The B input of a trigger component that has none must be
// driven high. All timing parameters are in cycles of clk, 1 ns by default.
module trigger_supervisor
  import ts_pkg::*;
#(
  parameter logic [5:0]  BASE         = 6'h00,
  parameter int unsigned WIDTH        = 50,
  parameter int unsigned SEP          = 125,
  parameter int unsigned STROBE_DELAY = 28,
  parameter int unsigned DECISION     = 1000,
  parameter int unsigned INT_LEN      = 250,
  parameter int unsigned FCLR_LEN     = 250,
  parameter int unsigned TEST_LEN     = 100
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  vme_req_t                    vme_req,
  output vme_rsp_t                    vme_rsp,
  input  logic                        interaction_trigger,
  input  logic                        global_veto,
  input  logic [NPART-1:0][NCOMP-1:0] trig_a,
  input  logic [NPART-1:0][NCOMP-1:0] trig_b,
  input  logic [NPART-1:0]            x_veto,
  output logic [NPART-1:0]            gate,
  output logic [NPART-1:0]            init_interrupt,
  output logic [NPART-1:0]            init_fast_clear,
  output logic [NPART-1:0][NCOMP-1:0] mon_s1,
  output logic [NPART-1:0][NCOMP-1:0] mon_s2,
  output logic [NPART-1:0][NCOMP-1:0] mon_s3,
  output logic [NPART-1:0][NCOMP-1:0] mon_s4,
  output logic                        event_strobe,
  output logic                        system_busy,
  output logic [NPART-1:0]            busy
);
  local_req_t       lreq;
  logic             std_pulse, delayed_event_strobe;
  logic [NPART-1:0] coupled, busy_clr, hit, fl_drive, vote_drive;
  logic [NPART-1:0] x_first_level, xsys_unused, fast_clear_done;
  logic [15:0]      rdata [NPART];
  logic [15:0]      part_rdata, event_count_unused;
  logic             system_first_level, system_vote;

  // Backplane wired-OR lines.
  assign system_first_level = |fl_drive;
  assign system_vote        = |vote_drive;

  always_comb begin
    part_rdata = '0;
    for (int p = 0; p < NPART; p++)
      if (hit[p]) part_rdata |= rdata[p];
  end

  control_module #(
    .BASE(BASE), .WIDTH(WIDTH), .SEP(SEP), .STROBE_DELAY(STROBE_DELAY)
  ) u_control (
    .clk, .rst_n,
    .req                  (vme_req),
    .rsp                  (vme_rsp),
    .interaction_trigger,
    .lreq,
    .part_hit             (|hit),
    .part_rdata,
    .std_pulse,
    .event_strobe,
    .delayed_event_strobe,
    .system_busy,
    .coupled,
    .busy,
    .busy_clr,
    .system_first_level,
    .x_first_level,
    .fast_clear_done,
    .event_count          (event_count_unused)
  );

  for (genvar p = 0; p < NPART; p++) begin : g_part
    partition_module #(
      .STROBE_DELAY(STROBE_DELAY), .DECISION(DECISION), .INT_LEN(INT_LEN),
      .FCLR_LEN(FCLR_LEN), .TEST_LEN(TEST_LEN)
    ) u_part (
      .clk, .rst_n,
      .ga                   (4'(p)),
      .lreq,
      .hit                  (hit[p]),
      .rdata                (rdata[p]),
      .trig_a               (trig_a[p]),
      .trig_b               (trig_b[p]),
      .x_veto               (x_veto[p]),
      .gate                 (gate[p]),
      .init_interrupt       (init_interrupt[p]),
      .init_fast_clear      (init_fast_clear[p]),
      .mon_s1               (mon_s1[p]),
      .mon_s2               (mon_s2[p]),
      .mon_s3               (mon_s3[p]),
      .mon_s4               (mon_s4[p]),
      .std_pulse,
      .event_strobe,
      .delayed_event_strobe,
      .coupled              (coupled[p]),
      .busy_bit             (busy[p]),
      .system_busy,
      .busy_clr             (busy_clr[p]),
      .global_veto,
      .system_first_level,
      .fl_drive             (fl_drive[p]),
      .system_vote,
      .vote_drive           (vote_drive[p]),
      .x_first_level        (x_first_level[p]),
      .xsys_first_level     (xsys_unused[p]),
      .fast_clear_done      (fast_clear_done[p])
    );
  end

  // At most one board answers an address; assert it.
  a_one_board: assert property (@(posedge clk) disable iff (!rst_n) $countones(hit) <= 1)
    else $error("two partition boards answer one address");
endmodule
