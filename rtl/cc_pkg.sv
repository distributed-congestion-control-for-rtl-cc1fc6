// cc_pkg: types and constants shared by the congestion-control blocks.
//
// Data NoC flits are 16 bits wide. A packet starts with two header flits.
// The first carries the routing information (message class, tag,
// destination input port, destination address); the second carries the
// destination logic ID and the two fields added for congestion control:
// a 3-bit priority and the 4-bit address of the sending tile. The routers
// only look at the first flit, so the extension is invisible to them.
// Priority 0 is the most important; 7 the least (this is the reading under
// which a packet whose priority is below the exemption value is shielded
// from congestion control).
//
// Congestion notifications travel on the control network as a small
// record: the tile to throttle (destination), the router that saw the
// congestion (sender) and the priority of the offending packet.
//
// The congestion monitor's registers are word addressed on a 16-bit bus;
// the map below is this design's choice (only the names cmBufMsk and the
// autonomous-mode register come from the original description).
package cc_pkg;

  localparam int FLIT_W = 16;
  localparam int ADDR_W = 4;   // tile address: Source/Destination Address[3:0]
  localparam int PRIO_W = 3;   // Priority[6:4]: 8 levels

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [PRIO_W-1:0] prio_t;
  typedef logic [FLIT_W-1:0] flit_t;

  // First header flit (routing). The tag is taken as bits 13:8 so that the
  // four fields tile the 16 bits.
  typedef struct packed {
    logic [1:0] msg_class;   // [15:14]
    logic [5:0] msg_tag;     // [13:8]
    logic [3:0] dest_port;   // [7:4]  destination input port
    addr_t      dest_addr;   // [3:0]
  } hdr1_t;

  // Second header flit, extended with priority and source address.
  typedef struct packed {
    logic [8:0] dest_lid;    // [15:7] destination logic ID
    prio_t      prio;        // [6:4]
    addr_t      src;         // [3:0]
  } hdr2_t;

  // A congestion notification on the control network.
  typedef struct packed {
    addr_t dest;     // tile whose traffic caused the congestion
    addr_t sender;   // router that detected it
    prio_t prio;     // priority of the offending packet
  } notif_t;

  // Congestion monitor register map (word addresses).
  typedef enum logic [3:0] {
    REG_CTRL      = 4'h0,  // [0] autonomous mode (reset 1), [1] tx busy (ro)
    REG_BUFMSK    = 4'h1,  // cmBufMsk: one enable bit per buffer monitor
    REG_THRESHOLD = 4'h2,  // congestion threshold in packets
    REG_DEPTH     = 4'h3,  // effective history depth minus one
    REG_EXEMPTION = 4'h4,  // priorities below this never cause notifications
    REG_TIMER     = 4'h5,  // free-running timer, read/write
    REG_STAT_SENT = 4'h6,  // notifications sent (write clears)
    REG_STAT_RECV = 4'h7,  // notifications received (write clears)
    REG_LOCAL     = 4'h8,  // latest local congestion report, read clears
    REG_TX        = 4'h9,  // write: send {prio[6:4], dest[3:0]} (manual mode)
    REG_RX        = 4'hA   // received notification, read clears
  } cm_reg_e;

endpackage
