// dvc_pkg: shared types and constants of the Dynamic Virtual Circuit (DVC)
// network.
//
// A packet travels through the switches as one struct. The fields model the
// header of the packet format (RVC field with four type/length bits, the
// optional DVC identifier = source and destination, the optional sequence
// number, the optional length) plus a single payload word that stands for the
// data phits. The time a packet holds a link is its phit count, computed by
// pkt_phits(): one phit per header field present plus its data phits. The
// header fields and the four RVC-field bits follow the packet format; the
// field widths, the payload word and the control-packet lengths are this
// design's own choices.
package dvc_pkg;

  // ---- network size and link resources --------------------------------
  localparam int unsigned NODE_W    = 6;    // node id width, 64 nodes (8x8)
  localparam int unsigned RVC_W     = 3;    // RVC identifier width
  localparam int unsigned SEQ_W     = 8;    // sequence number width
  localparam int unsigned LEN_W     = 5;    // data length field, max 31 data phits
  localparam int unsigned PAYLOAD_W = 32;   // token standing for the data phits
  localparam int unsigned NPORT     = 5;    // 4 mesh ports + 1 host port
  localparam int unsigned PORT_W    = 3;
  localparam int unsigned TIME_W    = 16;   // arrival time stamp for age

  // The RVC dedicated to the diversion BVC on every link.
  localparam logic [RVC_W-1:0] DIV_RVC = '0;

  // Port numbering of a mesh switch.
  localparam logic [PORT_W-1:0] P_HOST = 3'd0;
  localparam logic [PORT_W-1:0] P_XP   = 3'd1;  // towards x+1
  localparam logic [PORT_W-1:0] P_XM   = 3'd2;  // towards x-1
  localparam logic [PORT_W-1:0] P_YP   = 3'd3;  // towards y+1
  localparam logic [PORT_W-1:0] P_YM   = 3'd4;  // towards y-1

  // ---- packet ----------------------------------------------------------
  typedef enum logic [1:0] {
    PK_DATA = 2'd0,   // data packet
    PK_CEP  = 2'd1,   // circuit establishment packet
    PK_CDP  = 2'd2    // circuit destruction packet
  } ptype_e;

  typedef struct packed {
    ptype_e                 ptype;    // } four bits carried in the RVC
    logic                   has_seq;  // } field: type, sequence present,
    logic                   is_max;   // } maximum length
    logic [RVC_W-1:0]       rvc;
    logic [NODE_W-1:0]      src;      // DVC id, present in CEPs and
    logic [NODE_W-1:0]      dst;      // diverted data packets
    logic [SEQ_W-1:0]       seq;
    logic [LEN_W-1:0]       len;      // data phits
    logic [PAYLOAD_W-1:0]   payload;
  } pkt_t;

  // ---- Input Mapping Table entry ----------------------------------------
  typedef enum logic [1:0] {
    RS_FREE    = 2'd0,  // no DVC on this input RVC
    RS_MAPPED  = 2'd1,  // DVC established through this switch
    RS_TORN    = 2'd2   // DVC torn down here, information retained
  } rvc_state_e;

  typedef struct packed {
    rvc_state_e         state;
    logic [PORT_W-1:0]  oport;
    logic [RVC_W-1:0]   orvc;
    logic [NODE_W-1:0]  src;
    logic [NODE_W-1:0]  dst;
    logic [SEQ_W-1:0]   seq;       // seq of the packet last sent on orvc
    logic               need_seq;  // next packet sent must carry seq
    logic [3:0]         npend;     // data packets queued in N_l on this RVC
  } imt_entry_t;

  // Number of phits a packet occupies on a link.
  function automatic int unsigned pkt_phits(pkt_t p);
    int unsigned n;
    n = 1;                                            // RVC field
    if (p.ptype == PK_CEP || (p.ptype == PK_DATA && p.rvc == DIV_RVC)) n++; // DVC id
    if (p.has_seq) n++;                               // sequence number
    if (p.ptype == PK_DATA && !p.is_max) n++;         // length field
    if (p.ptype == PK_DATA) n += p.len;
    return n;
  endfunction

  // Node id <-> coordinates: id = y*8 + x (x in the low three bits).
  function automatic logic [2:0] node_x(logic [NODE_W-1:0] id);
    return id[2:0];
  endfunction
  function automatic logic [2:0] node_y(logic [NODE_W-1:0] id);
    return id[5:3];
  endfunction

endpackage
