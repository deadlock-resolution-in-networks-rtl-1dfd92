// dvc_pkg: types and constants shared by the Dynamic Virtual Circuit (DVC)
// switch and its deadlock detection and resolution logic.
//
// A packet moves as one word per cycle (a single-flit packet). Its header
// carries the virtual channel number, the only routing information a data
// packet on an established circuit needs. Circuit Establishment Packets (CEPs)
// also carry the destination node; CEPs and Circuit Destruction Packets (CDPs)
// created at an intermediate node carry that node's id and a local timestamp so
// the receiving host can order packets of a rerouted circuit. A DUMMY packet is
// rotated around a deadlock cycle when a node has nothing to forward.
//
// Control messages of the deadlock algorithm travel on their own wires:
// TEST searches for a cycle, NOCYCLE cancels a search, CYCLE commits the
// members of a found cycle to a rotation.
//
// Field widths are this design's choice; they fit the 6 x 6 mesh, 5-port
// switches and 16 virtual channels per link used as defaults.
package dvc_pkg;

  localparam int unsigned NODE_W  = 6;   // node id width (up to 64 nodes)
  localparam int unsigned VC_W    = 4;   // virtual channel number width
  localparam int unsigned NVC     = 16;  // virtual channels per physical link
  localparam int unsigned NPORT   = 5;   // switch ports: local, N, E, S, W
  localparam int unsigned PORT_W  = 3;
  localparam int unsigned TS_W    = 8;   // timestamp width
  localparam int unsigned SEQ_W   = 8;   // detection sequence number width
  localparam int unsigned VNODE_W = 9;   // virtual node id = node*NPORT + port
  localparam int unsigned DATA_W  = 16;  // payload width

  // Port numbering of a mesh switch.
  localparam logic [PORT_W-1:0] P_LOCAL = 3'd0;
  localparam logic [PORT_W-1:0] P_NORTH = 3'd1;
  localparam logic [PORT_W-1:0] P_EAST  = 3'd2;
  localparam logic [PORT_W-1:0] P_SOUTH = 3'd3;
  localparam logic [PORT_W-1:0] P_WEST  = 3'd4;

  typedef enum logic [1:0] {
    PK_DATA  = 2'd0,
    PK_CEP   = 2'd1,
    PK_CDP   = 2'd2,
    PK_DUMMY = 2'd3
  } pkt_type_e;

  typedef struct packed {
    pkt_type_e         ptype;
    logic [VC_W-1:0]   vc;
    logic [NODE_W-1:0] dest;     // CEP: ultimate destination node
    logic [NODE_W-1:0] tear_id;  // CEP/CDP: node that created it (0 from host)
    logic [TS_W-1:0]   tstamp;   // CEP/CDP: creating node's timestamp
    logic [DATA_W-1:0] payload;
  } packet_t;

  // One entry of an Input Mapping Table. 'mapped' says the circuit is
  // established through this switch; 'dest_known' keeps the circuit's
  // destination after the circuit has been cut here, so that the next packet
  // on it can re-establish it.
  typedef struct packed {
    logic              mapped;
    logic              dest_known;
    logic [PORT_W-1:0] out_port;
    logic [VC_W-1:0]   out_vc;
    logic [NODE_W-1:0] dest;
  } imt_entry_t;

  typedef enum logic [1:0] {
    CM_TEST    = 2'd0,
    CM_NOCYCLE = 2'd1,
    CM_CYCLE   = 2'd2
  } ctrl_type_e;

  typedef struct packed {
    ctrl_type_e         mtype;
    logic [SEQ_W-1:0]   seq;
    logic [VNODE_W-1:0] maxid;    // TEST: largest virtual node id on the path
    logic [PORT_W-1:0]  src_port; // input port (virtual node) that sent it
    logic [PORT_W-1:0]  dst_port; // input port (virtual node) it is for
  } ctrl_msg_t;

  // Event counters a switch keeps for monitoring.
  localparam int unsigned STAT_W = 16;
  typedef struct packed {
    logic [STAT_W-1:0] blocked;       // buffers declared Blocked
    logic [STAT_W-1:0] search;        // cycle searches started
    logic [STAT_W-1:0] failed;        // searches cancelled (no deadlock)
    logic [STAT_W-1:0] leader;        // cycles found (this node led)
    logic [STAT_W-1:0] rotated;       // rotations a virtual node took part in
    logic [STAT_W-1:0] unmapped_rot;  // unmapped packets moved to the free bank
    logic [STAT_W-1:0] dummy_rot;     // dummy packets rotated
    logic [STAT_W-1:0] aux_wait;      // packets parked in an Auxiliary Buffer
    logic [STAT_W-1:0] reestablish;   // cut circuits re-established
    logic [STAT_W-1:0] stall;         // output cycles lost to a full neighbour
    logic [STAT_W-1:0] rq_overflow;   // rotated packets lost (must stay 0)
  } stats_t;

  // Opposite side of a mesh link: the input port at the neighbour that a
  // packet sent out of port p arrives on.
  function automatic logic [PORT_W-1:0] opposite_port(input logic [PORT_W-1:0] p);
    case (p)
      P_NORTH: return P_SOUTH;
      P_SOUTH: return P_NORTH;
      P_EAST:  return P_WEST;
      P_WEST:  return P_EAST;
      default: return P_LOCAL;
    endcase
  endfunction

  // Virtual channel of the free channel bank that input port p owns on every
  // output port. The bank is the top NPORT channels of each link.
  function automatic logic [VC_W-1:0] bank_vc(input logic [PORT_W-1:0] p);
    return VC_W'(NVC - NPORT) + VC_W'(p);
  endfunction

  function automatic logic is_bank_vc(input logic [VC_W-1:0] vc);
    return 32'(vc) >= NVC - NPORT;
  endfunction

endpackage
