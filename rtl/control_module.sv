// control_module: the control module of the trigger supervisor.
//
// Event strobe chain: the interaction trigger (ORed with a test trigger,
// below) is standardized to WIDTH-cycle pulses at least SEP cycles apart,
// gated by the system busy latch into EVENT STROBE, and delayed by
// STROBE_DELAY cycles into DELAYED EVENT STROBE, which times the gates on
// every partition module. SYSTEM FIRST-LEVEL (the backplane wired-OR of the
// coupled partitions) sets system busy; system busy clears once no coupled
// partition has its busy bit set any more.
//
// Registers (16 bits unless noted), reached from the host through VME short
// space: Coupled (which partitions are coupled), Busy (which partitions are
// in an event), Event Counter (coupled events), Set-Clear Select (mask for
// the Function byte) and the Function byte (bit 0 sets, bit 1 clears the
// selected Busy bits; reads 0). The hardware sets a partition's Busy bit
// with SYSTEM FIRST-LEVEL when coupled and with its own X FIRST-LEVEL when
// uncoupled, and clears it at the end of the partition's fast clear.
// Whenever a Busy bit falls, busy_clr pulses for that partition one cycle
// later (X BUSY CLR). The Event Counter counts a SYSTEM FIRST-LEVEL edge
// only while system busy is still clear, so a glitch on the trailing edge
// of the wired-OR line is not counted as a second event.
//
// Address decoding of the 1024-byte window (A15..A10 = BASE, address
// modifier 0x29 or 0x2D): A09 = 0 is the prescaler subspace (SCALER SELECT),
// A09 = 1 with A04 = 0 the other partition functions (PARTITION SELECT),
// both with A08..A05 naming the partition board. A09 = 1 with A04 = 1
// reaches the control registers at A03..A00: 0 Coupled, 2 Busy, 4 Event
// Counter, 6 Set-Clear Select, 8 Function. Word registers sit at even
// addresses with the even byte in data[15:8]; byte accesses carry data in
// data[7:0]. Busy is read-only, Event Counter may be written to preset it.
// A write to any partition's Pulse register also fires a test interaction
// trigger, so a simulated event gets an event strobe.
//
// The host answer (rsp.ack, rsp.rdata) is registered: one cycle after the
// request. A request that no module claims is not acknowledged.
//
// The register set, the use of A08..A05 and the two select signals follow
// the design; the other address bits, BASE, the Function bit assignment and
// the one-cycle bus are this model's choices.
module control_module
  import ts_pkg::*;
#(
  parameter logic [5:0]  BASE         = 6'h00,
  parameter int unsigned WIDTH        = 50,
  parameter int unsigned SEP          = 125,
  parameter int unsigned STROBE_DELAY = 28
) (
  input  logic             clk,
  input  logic             rst_n,
  input  vme_req_t         req,
  output vme_rsp_t         rsp,
  input  logic             interaction_trigger,
  // P2 backplane
  output local_req_t       lreq,
  input  logic             part_hit,        // some partition answers lreq
  input  logic [15:0]      part_rdata,
  output logic             std_pulse,
  output logic             event_strobe,
  output logic             delayed_event_strobe,
  output logic             system_busy,
  output logic [NPART-1:0] coupled,
  output logic [NPART-1:0] busy,
  output logic [NPART-1:0] busy_clr,
  input  logic             system_first_level,
  input  logic [NPART-1:0] x_first_level,
  input  logic [NPART-1:0] fast_clear_done,
  output logic [15:0]      event_count
);
  // ---------------- decode ----------------
  logic mine, ctrl_sel, scaler_sel, part_sel;
  assign mine = req.valid && (req.addr[15:10] == BASE) &&
                (req.am == AM_SHORT_USER || req.am == AM_SHORT_SUPV);
  assign scaler_sel = mine && !req.addr[9];
  assign part_sel   = mine &&  req.addr[9] && !req.addr[4];
  assign ctrl_sel   = mine &&  req.addr[9] &&  req.addr[4];

  always_comb begin
    lreq.valid         = scaler_sel || part_sel;
    lreq.write         = req.write;
    lreq.word          = req.word;
    lreq.scaler_sel    = scaler_sel;
    lreq.partition_sel = part_sel;
    lreq.board         = req.addr[8:5];
    lreq.offset        = req.addr[4:0];
    lreq.wdata         = req.wdata;
  end

  // Byte lanes of a control register access.
  logic [3:0] off0, off1;
  logic [7:0] wb0, wb1;
  logic       cwr;
  assign off0 = req.word ? {req.addr[3:1], 1'b0} : req.addr[3:0];
  assign off1 = {req.addr[3:1], 1'b1};
  assign wb0  = req.word ? req.wdata[15:8] : req.wdata[7:0];
  assign wb1  = req.wdata[7:0];
  assign cwr  = ctrl_sel && req.write;

  // Write enable and data for the byte at offset o.
  function automatic logic lane_we(input logic [3:0] o, input logic [3:0] a0,
                                   input logic [3:0] a1, input logic word);
    return (o == a0) || (word && o == a1);
  endfunction

  function automatic logic [7:0] lane_d(input logic [3:0] o, input logic [3:0] a0,
                                        input logic [7:0] d0, input logic [7:0] d1);
    return (o == a0) ? d0 : d1;
  endfunction

  // ---------------- registers ----------------
  logic [15:0]      scsel;
  logic [NPART-1:0] busy_n, hw_set, fn_set, fn_clr;
  logic [NPART-1:0] xfl_q;
  logic             sfl_q, fn_we, test_trig;
  logic [7:0]       fn_byte;

  assign fn_we   = cwr && lane_we(C_FUNCTION, off0, off1, req.word);
  assign fn_byte = lane_d(C_FUNCTION, off0, wb0, wb1);
  assign fn_set  = (fn_we && fn_byte[FN_SET_BIT]) ? scsel : '0;
  assign fn_clr  = (fn_we && fn_byte[FN_CLR_BIT]) ? scsel : '0;
  assign hw_set  = ((system_first_level && !sfl_q) ? coupled : '0) |
                   (x_first_level & ~xfl_q & ~coupled);
  assign busy_n  = (busy & ~(fn_clr | fast_clear_done)) | hw_set | fn_set;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coupled     <= '0;
      scsel       <= '0;
      busy        <= '0;
      busy_clr    <= '0;
      event_count <= '0;
      xfl_q       <= '0;
      sfl_q       <= 1'b0;
      test_trig   <= 1'b0;
    end else begin
      xfl_q    <= x_first_level;
      sfl_q    <= system_first_level;
      busy     <= busy_n;
      busy_clr <= busy & ~busy_n;

      if (cwr && lane_we(C_COUPLED, off0, off1, req.word))
        coupled[15:8] <= lane_d(C_COUPLED, off0, wb0, wb1);
      if (cwr && lane_we(C_COUPLED | 4'd1, off0, off1, req.word))
        coupled[7:0]  <= lane_d(C_COUPLED | 4'd1, off0, wb0, wb1);
      if (cwr && lane_we(C_SCSEL, off0, off1, req.word))
        scsel[15:8]   <= lane_d(C_SCSEL, off0, wb0, wb1);
      if (cwr && lane_we(C_SCSEL | 4'd1, off0, off1, req.word))
        scsel[7:0]    <= lane_d(C_SCSEL | 4'd1, off0, wb0, wb1);

      if (cwr && lane_we(C_EVCOUNT, off0, off1, req.word))
        event_count[15:8] <= lane_d(C_EVCOUNT, off0, wb0, wb1);
      if (cwr && lane_we(C_EVCOUNT | 4'd1, off0, off1, req.word))
        event_count[7:0]  <= lane_d(C_EVCOUNT | 4'd1, off0, wb0, wb1);
      if (!(cwr && (lane_we(C_EVCOUNT, off0, off1, req.word) ||
                    lane_we(C_EVCOUNT | 4'd1, off0, off1, req.word))) &&
          system_first_level && !sfl_q && !system_busy)
        event_count <= event_count + 1'b1;

      test_trig <= part_sel && req.write &&
                   (lreq.offset[3:0] == P_PULSE ||
                    (req.word && {lreq.offset[3:1], 1'b1} == P_PULSE));
    end
  end

  // ---------------- read back ----------------
  function automatic logic [7:0] ctrl_byte(input logic [3:0] o, input logic [15:0] cp,
      input logic [15:0] bz, input logic [15:0] ev, input logic [15:0] sc);
    case (o)
      4'h0: return cp[15:8];
      4'h1: return cp[7:0];
      4'h2: return bz[15:8];
      4'h3: return bz[7:0];
      4'h4: return ev[15:8];
      4'h5: return ev[7:0];
      4'h6: return sc[15:8];
      4'h7: return sc[7:0];
      default: return 8'h00;
    endcase
  endfunction

  logic [7:0] rb0, rb1;
  assign rb0 = ctrl_byte(off0, coupled, busy, event_count, scsel);
  assign rb1 = ctrl_byte(off1, coupled, busy, event_count, scsel);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp <= '0;
    end else begin
      rsp.ack <= ctrl_sel || (lreq.valid && part_hit);
      if (ctrl_sel)      rsp.rdata <= req.word ? {rb0, rb1} : {8'h00, rb0};
      else if (part_hit) rsp.rdata <= part_rdata;
      else               rsp.rdata <= '0;
    end
  end

  // ---------------- event strobe generation ----------------
  trigger_standardizer #(.WIDTH(WIDTH), .SEP(SEP)) u_std (
    .clk, .rst_n,
    .trig_in   (interaction_trigger | test_trig),
    .pulse_out (std_pulse)
  );

  busy_synchronizer u_sync (
    .clk, .rst_n,
    .pulse_in (std_pulse),
    .busy_set (system_first_level),
    .busy_clr ((busy & coupled) == '0),
    .busy     (system_busy),
    .strobe   (event_strobe)
  );

  strobe_delay #(.DELAY(STROBE_DELAY)) u_delay (
    .clk, .rst_n, .d(event_strobe), .q(delayed_event_strobe)
  );
endmodule
