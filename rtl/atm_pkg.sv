// atm_pkg: sizes and shared types of the 8x8 shared multi-buffer ATM switch.
//
// The switch is built as eight bit-sliced switch chips and one multicast-pointer
// chip.  Every chip carries one bit of each port's byte stream, so one cell
// (53 bytes) is a 53-bit slice per chip, stored as four 16-bit SBM words.
// Port count, SBM count, 16-bit SBM words, 8 kbit per SBM and 128 cells per
// SBM follow the published chip set; the number of multicast connections,
// queue depths and the slot schedule are this design's own choices.
package atm_pkg;
  localparam int unsigned NPORT      = 8;     // switch ports
  localparam int unsigned NSBM       = 8;     // shared buffer memories per chip
  localparam int unsigned CELLS      = 128;   // cells per SBM (8 kbit / 64 bit)
  localparam int unsigned WORD_W     = 16;    // SBM word width
  localparam int unsigned CELL_BYTES = 53;    // ATM cell length in bytes
  localparam int unsigned WPC        = 4;     // SBM words per cell slice
  localparam int unsigned NMCI       = 4;     // multicast connections
  localparam int unsigned OQ_DEPTH   = 1024;  // entries per output queue
  localparam int unsigned MQ_DEPTH   = 256;   // entries per multicast queue
  localparam int unsigned NREAD      = 3;     // SBM read cycles per cell slot
  localparam int unsigned QL_W       = 12;    // width of a (weighted) queue length

  localparam int unsigned PORT_W = $clog2(NPORT);
  localparam int unsigned SBM_W  = $clog2(NSBM);
  localparam int unsigned ADDR_W = $clog2(CELLS);

  // Entry of an output queue or multicast queue: where a cell sits.
  typedef struct packed {
    logic [SBM_W-1:0]  sbm;
    logic [ADDR_W-1:0] addr;
  } qentry_t;

  // Routing tag delivered with the first byte of every incoming cell.
  typedef struct packed {
    logic              valid;   // a cell arrives in this slot
    logic              mc;      // 1: multicast, dest holds the MCI
    logic [PORT_W-1:0] dest;    // output port (unicast) or MCI (multicast)
  } tag_t;

  // Per-slot event flags of a switch chip, one bit per port, valid while
  // ev_valid is high (once per slot).
  typedef struct packed {
    logic [NPORT-1:0] drop;        // arriving cell lost (no SBM space or queue full)
    logic [NPORT-1:0] uc_sent;     // unicast cell sent to this output
    logic [NPORT-1:0] mc_sent;     // multicast cell sent to this output
    logic [NPORT-1:0] hol_wait;    // head unicast cell not read this slot (HOL blocking)
    logic [NPORT-1:0] uc_late;     // head unicast cell read in the 2nd or 3rd read cycle
    logic [NPORT-1:0] mc_blocked;  // multicast cell lost its SBM to a unicast read
    logic [NPORT-1:0] contention;  // unicast and multicast cell both reached the output
    logic [NPORT-1:0] mc_release;  // last copy of a multicast cell sent, space freed
  } events_t;
endpackage
