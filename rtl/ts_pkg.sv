// ts_pkg: constants and types shared by the trigger supervisor modules.
//
// The supervisor is modelled as synchronous logic on one fast sampling
// clock. The default timing constants assume a 1 GHz clock, so one cycle is
// one nanosecond and the nanosecond figures of the design (50 ns standard
// pulse, 125 ns separation, 28 ns strobe delay, 1 us veto decision) become
// cycle counts directly. The clock rate is this model's choice; the
// nanosecond values are the design's.
//
// Register access: the crate is reached through a 1024-byte window of VME
// short (A16) space. The host-side request/response structs below stand for
// one VME data transfer cycle; the control module decodes them and passes a
// local request to the partition modules over the P2 backplane.
package ts_pkg;

  localparam int unsigned NPART = 16;  // partition modules in the crate
  localparam int unsigned NCOMP = 8;   // trigger components per partition
  localparam int unsigned PRESCALE_BITS = 24;

  // VME address modifiers accepted (short non-privileged / short supervisory).
  localparam logic [5:0] AM_SHORT_USER = 6'h29;
  localparam logic [5:0] AM_SHORT_SUPV = 6'h2D;

  // Offsets inside a partition's non-scaler subspace (A03..A00).
  localparam logic [3:0] P_ENABLE   = 4'h0;
  localparam logic [3:0] P_VETO_OVR = 4'h1;
  localparam logic [3:0] P_TRANS    = 4'h2;
  localparam logic [3:0] P_PATTERN  = 4'h3;
  localparam logic [3:0] P_PULSE    = 4'h4;

  // Offsets of the control module registers (A03..A00).
  localparam logic [3:0] C_COUPLED  = 4'h0;  // word
  localparam logic [3:0] C_BUSY     = 4'h2;  // word
  localparam logic [3:0] C_EVCOUNT  = 4'h4;  // word
  localparam logic [3:0] C_SCSEL    = 4'h6;  // word
  localparam logic [3:0] C_FUNCTION = 4'h8;  // byte

  // Function byte bits.
  localparam int unsigned FN_SET_BIT = 0;
  localparam int unsigned FN_CLR_BIT = 1;

  // One host data transfer. word=1: 16-bit access at an even address, the
  // even byte in data[15:8]. word=0: byte access, data in data[7:0].
  typedef struct packed {
    logic        valid;
    logic        write;
    logic        word;
    logic [5:0]  am;
    logic [15:0] addr;
    logic [15:0] wdata;
  } vme_req_t;

  typedef struct packed {
    logic        ack;    // this module answered the transfer
    logic [15:0] rdata;
  } vme_rsp_t;

  // Local access passed from the control module to the partition modules.
  typedef struct packed {
    logic        valid;
    logic        write;
    logic        word;
    logic        scaler_sel;     // SCALER SELECT
    logic        partition_sel;  // PARTITION SELECT
    logic [3:0]  board;          // A08..A05
    logic [4:0]  offset;         // A04..A00
    logic [15:0] wdata;
  } local_req_t;

endpackage
