// partition_module: one partition module of the trigger supervisor.
//
// Holds the eight trigger components of partition X and everything that
// turns their inputs into front-end gates and second-level decisions:
//   - trigger_component x8: coincidence, enable, strobe gating, prescaling;
//     their accepted outputs are ORed into X FIRST-LEVEL; the monitor
//     points S1..S4 of every component are brought out;
//   - first_level_coupler: X FIRST-LEVEL onto SYSTEM FIRST-LEVEL when the
//     partition is coupled, and the choice of X/SYSTEM FIRST-LEVEL;
//   - gate generation: a first-level decision of this event opens the gate
//     for the full width of the delayed strobe; the gate starts on the
//     delayed strobe's leading edge, so its timing does not depend on which
//     component or partition caused the event;
//   - veto_logic: vote, veto, survivors, 1 us interrupt / fast clear choice;
//   - the partition registers: Enable, Veto Override (veto survivors),
//     transaction counter, trigger pattern, Pulse, and the eight prescalers.
//
// Coupled partitions take EVENT STROBE and DELAYED EVENT STROBE from the
// control module. An uncoupled partition has its own dead time; this model
// gives it a local busy_synchronizer and strobe_delay driven by the
// standardized interaction trigger and by its own busy bit. How uncoupled
// partitions obtain their strobe is not spelled out in the design; this is
// the model's choice.
//
// Register access arrives as a local request from the control module. The
// board answers when its geographic address equals A08..A05 and SCALER
// SELECT or PARTITION SELECT is active; the read data is combinational.
//   PARTITION SELECT, A03..A00: 0 Enable, 1 Veto Override, 2 transaction
//     counter (read), 3 trigger pattern (read), 4 Pulse (write: one test
//     pulse of TEST_LEN cycles into every component). Other offsets read 0.
//   SCALER SELECT, A04..A02 = component, A01..A00: 1 bits 23:16,
//     2 bits 15:8, 3 bits 7:0 of the prescale preset; 0 reads 0.
// Word accesses cover two bytes, the even one in data[15:8]. The offsets
// are this model's choice; the register set is the design's.
module partition_module
  import ts_pkg::*;
#(
  parameter int unsigned STROBE_DELAY = 28,
  parameter int unsigned DECISION     = 1000,
  parameter int unsigned INT_LEN      = 250,
  parameter int unsigned FCLR_LEN     = 250,
  parameter int unsigned TEST_LEN     = 100
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       ga,                  // geographic address from P2
  input  local_req_t       lreq,
  output logic             hit,
  output logic [15:0]      rdata,
  // front panel
  input  logic [NCOMP-1:0] trig_a,
  input  logic [NCOMP-1:0] trig_b,              // tie high where absent
  input  logic             x_veto,
  output logic             gate,
  output logic             init_interrupt,
  output logic             init_fast_clear,
  output logic [NCOMP-1:0] mon_s1,
  output logic [NCOMP-1:0] mon_s2,
  output logic [NCOMP-1:0] mon_s3,
  output logic [NCOMP-1:0] mon_s4,
  // from / to the control module over P2
  input  logic             std_pulse,           // standardized interaction trigger
  input  logic             event_strobe,
  input  logic             delayed_event_strobe,
  input  logic             coupled,
  input  logic             busy_bit,
  input  logic             system_busy,
  input  logic             busy_clr,
  input  logic             global_veto,
  input  logic             system_first_level,
  output logic             fl_drive,
  input  logic             system_vote,
  output logic             vote_drive,
  output logic             x_first_level,
  output logic             xsys_first_level,
  output logic             fast_clear_done
);
  localparam int unsigned W = PRESCALE_BITS;

  // ---------------- register access ----------------
  logic sel_p, sel_s, wr_p, wr_s;
  assign sel_p = lreq.valid && lreq.partition_sel && (lreq.board == ga);
  assign sel_s = lreq.valid && lreq.scaler_sel    && (lreq.board == ga);
  assign hit   = sel_p || sel_s;
  assign wr_p  = sel_p && lreq.write;
  assign wr_s  = sel_s && lreq.write;

  // Byte lanes touched by this access: lane0 = the addressed (even for word)
  // byte, lane1 = the following odd byte of a word access.
  logic [4:0] off0, off1;
  logic [7:0] wb0, wb1;
  assign off0 = lreq.word ? {lreq.offset[4:1], 1'b0} : lreq.offset;
  assign off1 = {lreq.offset[4:1], 1'b1};
  assign wb0  = lreq.word ? lreq.wdata[15:8] : lreq.wdata[7:0];
  assign wb1  = lreq.wdata[7:0];

  function automatic logic touches(input logic [4:0] o, input logic [4:0] a0,
                                   input logic [4:0] a1, input logic word);
    return (o == a0) || (word && o == a1);
  endfunction

  function automatic logic [7:0] wbyte(input logic [4:0] o, input logic [4:0] a0,
                                       input logic [7:0] d0, input logic [7:0] d1);
    return (o == a0) ? d0 : d1;
  endfunction

  logic [NCOMP-1:0] enable, veto_ovr, pattern;
  logic [7:0]       trans_count;
  logic [W-1:0]     preset [NCOMP];
  logic [W-1:0]     count  [NCOMP];
  logic [W-1:0]     sc_data [NCOMP];
  logic [W-1:0]     sc_mask [NCOMP];

  // Prescaler writes: byte 1..3 of the 4-byte slot of component k.
  always_comb begin
    for (int k = 0; k < NCOMP; k++) begin
      sc_data[k] = '0;
      sc_mask[k] = '0;
      for (int by = 1; by <= 3; by++) begin
        logic [4:0] o;
        o = 5'(k * 4 + by);
        if (wr_s && touches(o, off0, off1, lreq.word)) begin
          sc_data[k][(3 - by) * 8 +: 8] = wbyte(o, off0, wb0, wb1);
          sc_mask[k][(3 - by) * 8 +: 8] = 8'hFF;
        end
      end
    end
  end

  function automatic logic [7:0] part_byte(input logic [4:0] o,
      input logic [7:0] en, input logic [7:0] vo, input logic [7:0] tc,
      input logic [7:0] pt);
    if (o[4]) return 8'h00;
    case (o[3:0])
      P_ENABLE:   return en;
      P_VETO_OVR: return vo;
      P_TRANS:    return tc;
      P_PATTERN:  return pt;
      default:    return 8'h00;
    endcase
  endfunction

  function automatic logic [7:0] scaler_byte(input logic [1:0] o, input logic [W-1:0] p);
    case (o)
      2'd1:    return p[23:16];
      2'd2:    return p[15:8];
      2'd3:    return p[7:0];
      default: return 8'h00;
    endcase
  endfunction

  always_comb begin
    logic [7:0] b0, b1;
    if (sel_s) begin
      b0 = scaler_byte(off0[1:0], preset[off0[4:2]]);
      b1 = scaler_byte(off1[1:0], preset[off1[4:2]]);
    end else if (sel_p) begin
      b0 = part_byte(off0, enable, veto_ovr, trans_count, pattern);
      b1 = part_byte(off1, enable, veto_ovr, trans_count, pattern);
    end else begin
      b0 = '0;
      b1 = '0;
    end
    rdata = lreq.word ? {b0, b1} : {8'h00, b0};
  end

  // ---------------- trigger components ----------------
  logic             strobe_used, busy_used, test;
  logic [NCOMP-1:0] s4, s3, gated_unused, ovf_unused;
  logic [$clog2(TEST_LEN + 1)-1:0] test_cnt;

  assign busy_used = coupled ? system_busy : busy_bit;
  assign test      = (test_cnt != '0);

  for (genvar k = 0; k < NCOMP; k++) begin : g_comp
    trigger_component #(.W(W)) u_comp (
      .clk, .rst_n,
      .a           (trig_a[k]),
      .b           (trig_b[k]),
      .test,
      .enable      (enable[k]),
      .strobe      (strobe_used),
      .busy        (busy_used),
      .wr_data     (sc_data[k]),
      .wr_mask     (sc_mask[k]),
      .preset      (preset[k]),
      .count       (count[k]),
      .s1          (mon_s1[k]),
      .s2          (mon_s2[k]),
      .s3          (s3[k]),
      .gated       (gated_unused[k]),
      .overflow    (ovf_unused[k]),
      .first_level (s4[k])
    );
  end

  assign x_first_level = |s4;
  assign mon_s3        = s3;
  assign mon_s4        = s4;

  first_level_coupler u_coupler (
    .x_first_level,
    .coupled,
    .system_first_level,
    .drive            (fl_drive),
    .xsys_first_level
  );

  // ---------------- local strobe for uncoupled operation ----------------
  logic local_busy_unused, local_strobe, local_delayed, gate_strobe;

  busy_synchronizer u_local_sync (
    .clk, .rst_n,
    .pulse_in (std_pulse & ~coupled),
    .busy_set (busy_bit),
    .busy_clr (~busy_bit),
    .busy     (local_busy_unused),
    .strobe   (local_strobe)
  );

  strobe_delay #(.DELAY(STROBE_DELAY)) u_local_delay (
    .clk, .rst_n, .d(local_strobe), .q(local_delayed)
  );

  assign strobe_used = coupled ? event_strobe : local_strobe;
  assign gate_strobe = coupled ? delayed_event_strobe : local_delayed;

  // ---------------- gates ----------------
  // A new event starts on a rising edge of X/SYSTEM FIRST-LEVEL outside an
  // event already in progress, so a glitch on the trailing edge of the
  // wired-OR line is not taken for a second event.
  logic xsys_q, gs_q, event_flag, gs_rise, new_event;
  assign gs_rise   = gate_strobe && !gs_q;
  assign new_event = xsys_first_level && !xsys_q && !event_flag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xsys_q     <= 1'b0;
      gs_q       <= 1'b0;
      event_flag <= 1'b0;
      gate       <= 1'b0;
    end else begin
      xsys_q <= xsys_first_level;
      gs_q   <= gate_strobe;
      if (new_event)                   event_flag <= 1'b1;
      else if (!gate_strobe && gs_q)   event_flag <= 1'b0;
      gate <= gate_strobe && (gs_rise ? (event_flag || xsys_first_level) : gate);
    end
  end

  // ---------------- registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable      <= '0;
      veto_ovr    <= '0;
      trans_count <= '0;
      pattern     <= '0;
      test_cnt    <= '0;
    end else begin
      if (wr_p && touches({1'b0, P_ENABLE}, off0, off1, lreq.word))
        enable <= wbyte({1'b0, P_ENABLE}, off0, wb0, wb1);
      if (wr_p && touches({1'b0, P_VETO_OVR}, off0, off1, lreq.word))
        veto_ovr <= wbyte({1'b0, P_VETO_OVR}, off0, wb0, wb1);

      if (wr_p && touches({1'b0, P_PULSE}, off0, off1, lreq.word))
        test_cnt <= ($bits(test_cnt))'(TEST_LEN);
      else if (test)
        test_cnt <= test_cnt - 1'b1;

      if (new_event) begin
        trans_count <= trans_count + 1'b1;
        pattern     <= s4;
      end else if (event_flag || xsys_first_level) begin
        pattern     <= pattern | s4;
      end
    end
  end

  // ---------------- second-level veto ----------------
  logic survivor_unused, x_vote_unused;

  veto_logic #(.DECISION(DECISION), .INT_LEN(INT_LEN), .FCLR_LEN(FCLR_LEN)) u_veto (
    .clk, .rst_n,
    .x_first_level,
    .xsys_first_level,
    .survivor_hit (|(s4 & veto_ovr)),
    .x_veto,
    .busy_clr,
    .coupled,
    .system_vote,
    .global_veto,
    .x_vote       (x_vote_unused),
    .vote_drive,
    .survivor     (survivor_unused),
    .init_interrupt,
    .init_fast_clear,
    .fast_clear_done
  );

  // The prescaler counters are observable only inside the module.
  logic unused_ok;
  assign unused_ok = ^{count[0], gated_unused, ovf_unused};
endmodule
