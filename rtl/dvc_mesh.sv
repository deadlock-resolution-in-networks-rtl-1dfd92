// dvc_mesh: a ROWS x COLS mesh of Dynamic Virtual Circuit switches with
// distributed deadlock detection and resolution; the top of the design.
//
// Node n = row*COLS + col holds one dvc_switch. Port 1 of a switch faces north
// (row-1), port 2 east (col+1), port 3 south (row+1), port 4 west (col-1); a
// packet leaving port p of one switch enters the neighbour at the opposite
// port. Each link carries the data path (valid, packet, rotated flag, ready) in
// one direction and the deadlock algorithm's control messages (valid, message,
// ready) on separate wires, so control messages get through even when the
// input port is full. Ports on the mesh edge are tied off: nothing arrives
// there, and nothing is routed there.
//
// Port 0 of every switch is brought out to the hosts: host_in_* injects
// packets (CEP to open a circuit on a channel of the host link, data packets on
// it, CDP to close it) under ready flow control, host_out_* delivers packets to
// the host, which takes them when host_out_ready is high. rt_we/rt_node/
// rt_dest/rt_port rewrite one routing table entry of one switch, for example to
// route some destinations column-first. stats[n] are the event counters of
// node n.
//
// The 6 x 6 size is that of the mesh the deadlock scheme was evaluated on; the
// buffer capacity CAP, the rotation queue RQ and the 400-clock detection period
// TIMEOUT are this design's defaults.
//
// Lint notes. Verilator reports circular logic through ci_ready/co_ready. The
// wires are arrays, and it follows them as a whole: a switch's co_valid feeds
// the neighbour's ci_valid, whose ci_ready feeds back co_ready, but co_ready
// only acknowledges the message and never feeds co_valid in the same cycle,
// so there is no real combinational loop. It also reports rst_n used both as
// an asynchronous reset and synchronously: the synchronous use is only the
// guard of simulation assertions inside the blocks, which synthesis drops.
module dvc_mesh
  import dvc_pkg::*;
#(
  parameter int unsigned ROWS    = 6,
  parameter int unsigned COLS    = 6,
  parameter int unsigned CAP     = 8,
  parameter int unsigned RQ      = 8,
  parameter int unsigned TIMEOUT = 400
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               host_in_valid  [ROWS*COLS],
  input  packet_t            host_in_pkt    [ROWS*COLS],
  output logic               host_in_ready  [ROWS*COLS],
  output logic               host_out_valid [ROWS*COLS],
  output packet_t            host_out_pkt   [ROWS*COLS],
  input  logic               host_out_ready [ROWS*COLS],
  input  logic               rt_we,
  input  logic [NODE_W-1:0]  rt_node,
  input  logic [NODE_W-1:0]  rt_dest,
  input  logic [PORT_W-1:0]  rt_port,
  output stats_t             stats [ROWS*COLS]
);
  localparam int unsigned NN = ROWS * COLS;

  logic      lo_valid [NN][NPORT];
  packet_t   lo_pkt   [NN][NPORT];
  logic      lo_rot   [NN][NPORT];
  logic      lo_ready [NN][NPORT];
  logic      li_valid [NN][NPORT];
  packet_t   li_pkt   [NN][NPORT];
  logic      li_rot   [NN][NPORT];
  logic      li_ready [NN][NPORT];
  logic      co_valid [NN][NPORT];
  ctrl_msg_t co_msg   [NN][NPORT];
  logic      co_ready [NN][NPORT];
  logic      ci_valid [NN][NPORT];
  ctrl_msg_t ci_msg   [NN][NPORT];
  logic      ci_ready [NN][NPORT];

  // neighbour of node n through port p, or -1 at the mesh edge
  function automatic int nbr(input int n, input int p);
    int r, c;
    r = n / int'(COLS);
    c = n % int'(COLS);
    case (p)
      1: return (r > 0)              ? n - int'(COLS) : -1;
      2: return (c < int'(COLS) - 1) ? n + 1          : -1;
      3: return (r < int'(ROWS) - 1) ? n + int'(COLS) : -1;
      4: return (c > 0)              ? n - 1          : -1;
      default: return -1;
    endcase
  endfunction

  for (genvar n = 0; n < NN; n++) begin : g_node
    dvc_switch #(.ROWS(ROWS), .COLS(COLS), .MY_ID(n), .CAP(CAP), .RQ(RQ), .TIMEOUT(TIMEOUT)) u_sw (
      .clk, .rst_n,
      .lo_valid(lo_valid[n]), .lo_pkt(lo_pkt[n]), .lo_rot(lo_rot[n]), .lo_ready(lo_ready[n]),
      .li_valid(li_valid[n]), .li_pkt(li_pkt[n]), .li_rot(li_rot[n]), .li_ready(li_ready[n]),
      .co_valid(co_valid[n]), .co_msg(co_msg[n]), .co_ready(co_ready[n]),
      .ci_valid(ci_valid[n]), .ci_msg(ci_msg[n]), .ci_ready(ci_ready[n]),
      .rt_we(rt_we && rt_node == NODE_W'(n)), .rt_dest, .rt_port,
      .stats(stats[n])
    );

    // host side of port 0
    assign li_valid[n][0]    = host_in_valid[n];
    assign li_pkt[n][0]      = host_in_pkt[n];
    assign li_rot[n][0]      = 1'b0;
    assign host_in_ready[n]  = li_ready[n][0];
    assign host_out_valid[n] = lo_valid[n][0];
    assign host_out_pkt[n]   = lo_pkt[n][0];
    assign lo_ready[n][0]    = host_out_ready[n];
    assign ci_valid[n][0]    = 1'b0;
    assign ci_msg[n][0]      = '0;
    assign co_ready[n][0]    = 1'b0;

    for (genvar p = 1; p < NPORT; p++) begin : g_link
      localparam int M = nbr(n, p);
      localparam int Q = (p == 1) ? 3 : (p == 3) ? 1 : (p == 2) ? 4 : 2;
      if (M >= 0) begin : g_conn
        // data and control entering node n at port p come from node M port Q
        assign li_valid[n][p] = lo_valid[M][Q];
        assign li_pkt[n][p]   = lo_pkt[M][Q];
        assign li_rot[n][p]   = lo_rot[M][Q];
        assign lo_ready[M][Q] = li_ready[n][p];
        assign ci_valid[n][p] = co_valid[M][Q];
        assign ci_msg[n][p]   = co_msg[M][Q];
        assign co_ready[M][Q] = ci_ready[n][p];
      end else begin : g_edge
        assign li_valid[n][p] = 1'b0;
        assign li_pkt[n][p]   = '0;
        assign li_rot[n][p]   = 1'b0;
        assign lo_ready[n][p] = 1'b0;
        assign ci_valid[n][p] = 1'b0;
        assign ci_msg[n][p]   = '0;
        assign co_ready[n][p] = 1'b0;
      end
    end
  end
endmodule
