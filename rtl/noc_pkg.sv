// noc_pkg: types and constants shared by the fault-tolerant mesh NoC.
//
// A packet is a single word moved in one cycle over a valid/ready link. It
// carries its kind (data, test, acknowledgement), a flood mark, its source and
// destination mesh coordinates, a sequence number that together with the
// source names it in the per-switch packet history, and a payload.
// Coordinates grow to the east (x) and to the north (y); switch (0,0) is the
// bottom-left corner, where the test session is started (PI), and
// (MESH_W-1,0) the bottom-right corner (PO).
// Port numbering, the packet layout and all widths here are this design's own
// choices; only the five ports per switch (four neighbours and a local
// processor) and the flood threshold of five come from the description.
package noc_pkg;

  // Field widths (chosen for meshes of up to 16 x 16 switches).
  localparam int unsigned COORD_W   = 4;
  localparam int unsigned SEQ_W     = 8;
  localparam int unsigned PAYLOAD_W = 16;

  // Number of ports per switch: local processor plus four neighbours.
  localparam int unsigned NPORTS = 5;

  // A switch floods a packet instead of routing it when it sees it this often.
  localparam int unsigned FLOOD_THRESHOLD_DEF = 5;

  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,
    P_EAST  = 3'd2,
    P_SOUTH = 3'd3,
    P_WEST  = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    PKT_DATA = 2'd0,
    PKT_TEST = 2'd1,
    PKT_ACK  = 2'd2
  } pkt_type_e;

  typedef logic [COORD_W-1:0] coord_t;

  typedef struct packed {
    pkt_type_e             ptype;
    logic                  flood;    // copy made by flooding
    coord_t                src_x;
    coord_t                src_y;
    coord_t                dst_x;
    coord_t                dst_y;
    logic [SEQ_W-1:0]      seq;
    logic [PAYLOAD_W-1:0]  payload;
  } pkt_t;

  // Identity of a packet in the history table: its source and sequence number.
  typedef struct packed {
    coord_t           src_x;
    coord_t           src_y;
    logic [SEQ_W-1:0] seq;
  } pkt_id_t;

  // What the routing unit decided for a data packet.
  typedef enum logic [2:0] {
    RT_DROP   = 3'd0,  // no usable port at all
    RT_LOCAL  = 3'd1,  // packet has arrived: hand it to the processor
    RT_SINGLE = 3'd2,  // only one fault-free port: use it (Figure 1.a)
    RT_NORMAL = 3'd3,  // XY direction is usable (Figure 1.d)
    RT_RANDOM = 3'd4,  // XY direction unusable: random usable port (Figure 1.c)
    RT_FLOOD  = 3'd5   // copy to every usable port except the incoming one
  } route_e;

  // One-cycle event pulses a switch reports, for monitoring and testing.
  typedef struct packed {
    logic test_flood;   // test packet flooded (first receipt)
    logic ack_sent;     // acknowledgement queued towards a neighbour
    logic ack_rcvd;     // acknowledgement received: port proven fault-free
    logic deliver;      // data packet handed to the local processor
    logic rt_single;    // routed by the single-port rule
    logic rt_excl_in;   // a fault-free incoming port was excluded
    logic rt_normal;    // routed in the XY direction
    logic rt_random;    // routed to a random usable port
    logic flood_start;  // fifth encounter: flooding started here
    logic flood_fwd;    // flooded copy forwarded
    logic drop;         // packet discarded (duplicate, no port, wrong mode)
  } sw_event_t;

  function automatic pkt_id_t pkt_id(pkt_t p);
    return '{src_x: p.src_x, src_y: p.src_y, seq: p.seq};
  endfunction

endpackage
