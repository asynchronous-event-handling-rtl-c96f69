// eq_pkg: types and constants shared by the Event Queue (EQ) Unit and the
// cluster dynamic schedulers of the Multi-ALU Processor event subsystem.
//
// An event word is 65 data bits plus one memory synchronization bit, as the
// EQ register file stores them. The C-Switch delivers one such word per cycle
// together with a destination thread slot, a transfer type and a data-available
// strobe; the EQ only accepts words addressed to thread slot 6 with the Queue
// transfer type. The widths of the thread slot and transfer type fields and
// the numeric encoding of the transfer types are this design's own choice.
// The event packet layout (event type in the four low bits of word 0, then
// memory address, operation data and target register address) follows the
// typical packet of the event subsystem; the split of word 0 above the event
// type is not fixed by the architecture and is left as one opaque field.
package eq_pkg;

  // Register file geometry.
  localparam int unsigned EQ_DEPTH  = 192;  // entries in the EQ FIFO
  localparam int unsigned DATA_W    = 65;   // data bits per entry
  localparam int unsigned WORD_W    = DATA_W + 1; // plus the sync bit
  localparam int unsigned CNT_W     = $clog2(EQ_DEPTH + 1); // 0..EQ_DEPTH

  // C-Switch destination that selects the EQ.
  localparam int unsigned TSLOT_W   = 3;
  localparam logic [TSLOT_W-1:0] EQ_TSLOT = 3'd6;

  // Thread slots scheduled on a cluster: four user and two system V-Threads.
  localparam int unsigned NUM_USER   = 4;
  localparam int unsigned NUM_SYS    = 2;
  localparam int unsigned NUM_SLOTS  = NUM_USER + NUM_SYS;
  localparam int unsigned SLOT_W     = $clog2(NUM_SLOTS);
  localparam int unsigned NUM_CLUSTERS = 4;

  // C-Switch transfer types. Only XFR_QUEUE matters to the EQ.
  typedef enum logic [1:0] {
    XFR_REG   = 2'd0,
    XFR_QUEUE = 2'd1,
    XFR_MEM   = 2'd2,
    XFR_CFG   = 2'd3
  } xfr_type_e;

  // One word as held in the FIFO.
  typedef struct packed {
    logic              sync; // memory synchronization bit
    logic [DATA_W-1:0] data;
  } eq_word_t;

  // One C-Switch transfer as seen at the EQ input.
  typedef struct packed {
    logic               dav;      // data available
    logic [TSLOT_W-1:0] tslot;    // destination thread slot
    xfr_type_e          xfr_type; // transfer type
    eq_word_t           word;     // the data word
  } csw_pkt_t;

  // Word 0 of an event packet.
  localparam int unsigned EVTYPE_W = 4;
  typedef struct packed {
    logic [DATA_W-EVTYPE_W-1:0] faulting_op; // op-code, cluster, unit, ...
    logic [EVTYPE_W-1:0]        event_type;
  } event_word0_t;

endpackage
