// dvc_switch: a five-port Dynamic Virtual Circuit switch with deadlock
// detection and resolution.
//
// Port 0 connects the local host, ports 1 to 4 the north, east, south and west
// neighbours of a mesh. Each input port (input_port) maps arriving packets
// through its Input Mapping Table into a DAMQ buffer with one queue per output
// port. Each output port chooses, round robin, one input whose queue for it is
// non-empty, provided the neighbour's input port is ready; an input port gives
// at most one packet per cycle. A CDP leaving an output port returns its
// virtual channel to that port's allocator (vc_allocator); channels are taken
// by CEPs and by re-established circuits. New circuits are routed by the
// routing table (route_table).
//
// Deadlock handling follows the input-buffered adaptation of a detect-and-
// rotate algorithm: every input port buffer is a virtual node. blocked_detector
// periodically declares one buffer Blocked; that virtual node's cycle_detector
// searches along the output ports its packets wait for. Control messages have
// their own link wires (ctrl out/in, valid/ready) and name the virtual node they
// come from and, when they travel backwards, the one they are for. When a cycle
// is committed, each member forwards one packet to its successor out of turn: a
// rotated packet takes its output port ahead of normal traffic and is sent
// with lo_rot set, without waiting for the neighbour's ready. The switch keeps
// one timestamp that is advanced each time an unmapped packet is moved onto the
// free channel bank.
//
// Interface: per port p, data link out (lo_valid, lo_pkt, lo_rot, lo_ready),
// data link in (li_valid, li_pkt, li_rot, li_ready), control out (co_valid,
// co_msg, co_ready) and control in (ci_valid, ci_msg, ci_ready). A normal
// packet crosses a link in the cycle lo_valid and lo_ready are both high. The
// routing table write port (rt_we, rt_dest, rt_port) and event counters
// (stats) are for software. The input port from the local host cannot be part
// of a deadlock cycle and starts no search.
//
// Round-robin arbitration, combinational links and the counters are this
// design's choices.
//
// Lint note: bit 0 of the blocked detector's status is not read, because the
// host input port never starts a search.
module dvc_switch
  import dvc_pkg::*;
#(
  parameter int unsigned ROWS    = 6,
  parameter int unsigned COLS    = 6,
  parameter int unsigned MY_ID   = 0,
  parameter int unsigned CAP     = 8,
  parameter int unsigned RQ      = 8,
  parameter int unsigned TIMEOUT = 400
) (
  input  logic               clk,
  input  logic               rst_n,
  // data links
  output logic               lo_valid [NPORT],
  output packet_t            lo_pkt   [NPORT],
  output logic               lo_rot   [NPORT],
  input  logic               lo_ready [NPORT],
  input  logic               li_valid [NPORT],
  input  packet_t            li_pkt   [NPORT],
  input  logic               li_rot   [NPORT],
  output logic               li_ready [NPORT],
  // control links
  output logic               co_valid [NPORT],
  output ctrl_msg_t          co_msg   [NPORT],
  input  logic               co_ready [NPORT],
  input  logic               ci_valid [NPORT],
  input  ctrl_msg_t          ci_msg   [NPORT],
  output logic               ci_ready [NPORT],
  // routing table write
  input  logic               rt_we,
  input  logic [NODE_W-1:0]  rt_dest,
  input  logic [PORT_W-1:0]  rt_port,
  output stats_t             stats
);
  localparam logic [NODE_W-1:0] MY_NODE = NODE_W'(MY_ID);

  // ------------------------------------------------------------ per-port wires
  logic [NODE_W-1:0]  rt_rd_dest [NPORT];
  logic [PORT_W-1:0]  rt_rd_port [NPORT];
  logic               va_req     [NPORT];
  logic [PORT_W-1:0]  va_port    [NPORT];
  logic               va_gnt_i   [NPORT];
  logic [VC_W-1:0]    va_vc_i    [NPORT];
  packet_t            head       [NPORT][NPORT];
  logic [NPORT-1:0]   qne        [NPORT];
  logic               sel_ok     [NPORT];
  logic               deq_valid  [NPORT];
  logic [PORT_W-1:0]  deq_q      [NPORT];
  logic               cyc_mode   [NPORT];
  logic               rot_start  [NPORT];
  logic [PORT_W-1:0]  succ       [NPORT];
  logic               rot_valid  [NPORT];
  packet_t            rot_pkt    [NPORT];
  logic [PORT_W-1:0]  rot_port   [NPORT];
  logic               rot_ack    [NPORT];
  logic               rot_arr    [NPORT];
  logic [TS_W-1:0]    ts_in      [NPORT];
  logic               ts_inc     [NPORT];
  logic [NPORT-1:0]   nonempty, moved, status, check_en;
  logic [PORT_W-1:0]  next_hop   [NPORT];
  logic               rq_room    [NPORT];
  logic               e_aux [NPORT], e_reest [NPORT], e_unm [NPORT], e_dum [NPORT], e_ovf [NPORT];
  logic               e_srch [NPORT], e_fail [NPORT], e_lead [NPORT], e_rot [NPORT];

  route_table #(.ROWS(ROWS), .COLS(COLS), .MY_ID(MY_ID), .NRD(NPORT)) u_rt (
    .clk, .rst_n, .rd_dest(rt_rd_dest), .rd_port(rt_rd_port),
    .we(rt_we), .wr_dest(rt_dest), .wr_port(rt_port)
  );

  for (genvar p = 0; p < NPORT; p++) begin : g_in
    input_port #(.MY_PORT(p), .CAP(CAP), .RQ(RQ)) u_ip (
      .clk, .rst_n, .my_node(MY_NODE),
      .in_valid(li_valid[p]), .in_pkt(li_pkt[p]), .in_rot(li_rot[p]), .in_ready(li_ready[p]),
      .rt_dest(rt_rd_dest[p]), .rt_port(rt_rd_port[p]),
      .va_req(va_req[p]), .va_port(va_port[p]), .va_gnt(va_gnt_i[p]), .va_vc(va_vc_i[p]),
      .head(head[p]), .q_nonempty(qne[p]), .sel_ok(sel_ok[p]),
      .deq_valid(deq_valid[p]), .deq_q(deq_q[p]),
      .cycle_mode(cyc_mode[p]), .rot_start(rot_start[p]), .succ(succ[p]),
      .rot_valid(rot_valid[p]), .rot_pkt(rot_pkt[p]), .rot_port(rot_port[p]), .rot_ack(rot_ack[p]),
      .rot_arrived(rot_arr[p]), .ts_in(ts_in[p]), .ts_inc(ts_inc[p]),
      .nonempty(nonempty[p]), .moved(moved[p]), .next_hop(next_hop[p]), .rq_room(rq_room[p]),
      .ev_aux_wait(e_aux[p]), .ev_reestablish(e_reest[p]), .ev_unmapped_rot(e_unm[p]),
      .ev_dummy_rot(e_dum[p]), .ev_rq_overflow(e_ovf[p])
    );
  end

  // ------------------------------------------------------- channel allocation
  logic [NPORT-1:0] va_req_o [NPORT];   // [output][input]
  logic [NPORT-1:0] va_gnt_o [NPORT];
  logic [VC_W-1:0]  va_vc_o  [NPORT];
  logic             rel_valid [NPORT];
  logic [VC_W-1:0]  rel_vc    [NPORT];

  always_comb begin
    for (int o = 0; o < NPORT; o++)
      for (int i = 0; i < NPORT; i++)
        va_req_o[o][i] = va_req[i] && (32'(va_port[i]) == o);
    for (int i = 0; i < NPORT; i++) begin
      va_gnt_i[i] = va_gnt_o[va_port[i]][i];
      va_vc_i[i]  = va_vc_o[va_port[i]];
    end
  end

  for (genvar o = 0; o < NPORT; o++) begin : g_va
    vc_allocator #(.N_VC(NVC), .N_BANK(NPORT), .NREQ(NPORT)) u_va (
      .clk, .rst_n, .req(va_req_o[o]), .gnt(va_gnt_o[o]), .gnt_vc(va_vc_o[o]),
      .rel_valid(rel_valid[o]), .rel_vc(rel_vc[o])
    );
  end

  // ------------------------------------------------------------ output stage
  logic [PORT_W-1:0] rr_last [NPORT];
  logic [NPORT-1:0]  won     [NPORT];    // [output] one-hot input chosen normally
  logic              want_stall [NPORT];

  always_comb begin
    logic [NPORT-1:0] in_used;
    int unsigned      idx;
    in_used = '0;
    idx     = 0;
    for (int i = 0; i < NPORT; i++) begin
      rot_ack[i]   = 1'b0;
      deq_valid[i] = 1'b0;
      deq_q[i]     = '0;
    end
    for (int o = 0; o < NPORT; o++) begin
      lo_valid[o]   = 1'b0;
      lo_pkt[o]     = '0;
      lo_rot[o]     = 1'b0;
      won[o]        = '0;
      want_stall[o] = 1'b0;
      rel_valid[o]  = 1'b0;
      rel_vc[o]     = '0;
      // rotated packets first
      for (int i = NPORT-1; i >= 0; i--) begin
        if (rot_valid[i] && 32'(rot_port[i]) == o) begin
          lo_valid[o] = 1'b1;
          lo_pkt[o]   = rot_pkt[i];
          lo_rot[o]   = 1'b1;
          won[o]      = NPORT'(1) << i;
        end
      end
      if (lo_rot[o]) begin
        for (int i = 0; i < NPORT; i++) if (won[o][i]) rot_ack[i] = 1'b1;
        won[o] = '0;
      end else begin
        for (int k = NPORT; k >= 1; k--) begin
          idx = (32'(rr_last[o]) + 32'(k)) % NPORT;
          if (qne[idx][o] && sel_ok[idx] && !in_used[idx]) won[o] = NPORT'(1) << idx;
        end
        for (int i = 0; i < NPORT; i++) begin
          if (won[o][i]) begin
            if (lo_ready[o]) begin
              lo_valid[o]  = 1'b1;
              lo_pkt[o]    = head[i][o];
              deq_valid[i] = 1'b1;
              deq_q[i]     = PORT_W'(o);
              in_used[i]   = 1'b1;
            end else begin
              want_stall[o] = 1'b1;
              won[o]        = '0;
            end
          end
        end
      end
      if (lo_valid[o] && lo_pkt[o].ptype == PK_CDP && !is_bank_vc(lo_pkt[o].vc)) begin
        rel_valid[o] = 1'b1;
        rel_vc[o]    = lo_pkt[o].vc;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NPORT; o++) rr_last[o] <= PORT_W'(NPORT - 1);
    end else begin
      for (int o = 0; o < NPORT; o++)
        for (int i = 0; i < NPORT; i++)
          if (won[o][i] && lo_valid[o]) rr_last[o] <= PORT_W'(i);
    end
  end

  // ---------------------------------------------------------------- timestamp
  logic [TS_W-1:0] ts;
  always_comb begin
    logic [TS_W-1:0] acc;
    acc = ts;
    for (int i = 0; i < NPORT; i++) begin
      ts_in[i] = acc;
      acc      = acc + TS_W'(ts_inc[i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ts <= '0;
    else        ts <= ts_in[NPORT-1] + TS_W'(ts_inc[NPORT-1]);
  end

  // ------------------------------------------------------- deadlock detection
  logic              blk_valid;
  logic [PORT_W-1:0] blk_idx;

  always_comb begin
    check_en = '0;
    for (int p = 1; p < NPORT; p++) check_en[p] = 1'b1;
  end

  blocked_detector #(.NBUF(NPORT), .TIMEOUT(TIMEOUT)) u_bd (
    .clk, .rst_n, .nonempty, .moved, .check_en, .status,
    .blocked_valid(blk_valid), .blocked_idx(blk_idx)
  );

  // control message wires per virtual node
  logic       cd_in_valid [NPORT];
  ctrl_msg_t  cd_in_msg   [NPORT];
  logic [PORT_W-1:0] cd_in_link [NPORT];
  logic       cd_in_ready [NPORT];
  logic       cd_out_valid [NPORT];
  ctrl_msg_t  cd_out_msg   [NPORT];
  logic [PORT_W-1:0] cd_out_link [NPORT];
  logic       cd_out_ack   [NPORT];

  // the local input port is no virtual node of any cycle
  assign cyc_mode[0]     = 1'b0;
  assign rot_start[0]    = 1'b0;
  assign succ[0]         = P_LOCAL;
  assign cd_in_ready[0]  = 1'b0;
  assign cd_out_valid[0] = 1'b0;
  assign cd_out_msg[0]   = '0;
  assign cd_out_link[0]  = P_LOCAL;
  assign e_srch[0] = 1'b0;
  assign e_fail[0] = 1'b0;
  assign e_lead[0] = 1'b0;
  assign e_rot[0]  = 1'b0;

  for (genvar p = 1; p < NPORT; p++) begin : g_cd
    cycle_detector u_cd (
      .clk, .rst_n,
      .my_vid(VNODE_W'(MY_ID * NPORT + p)), .my_port(PORT_W'(p)),
      .trigger(blk_valid && (32'(blk_idx) == p)),
      .blocked(status[p] && nonempty[p] && rq_room[p]),
      .next_hop(next_hop[p]),
      .in_valid(cd_in_valid[p]), .in_msg(cd_in_msg[p]), .in_link(cd_in_link[p]),
      .in_ready(cd_in_ready[p]),
      .out_valid(cd_out_valid[p]), .out_msg(cd_out_msg[p]), .out_link(cd_out_link[p]),
      .out_ack(cd_out_ack[p]),
      .cycle_mode(cyc_mode[p]), .succ(succ[p]), .rot_start(rot_start[p]),
      .rot_arrived(rot_arr[p]),
      .ev_search(e_srch[p]), .ev_failed(e_fail[p]), .ev_leader(e_lead[p]), .ev_rotated(e_rot[p])
    );
  end

  // outgoing control: each link takes the lowest-numbered virtual node for it
  always_comb begin
    int unsigned sel;
    sel = 0;
    for (int v = 0; v < NPORT; v++) cd_out_ack[v] = 1'b0;
    for (int l = 0; l < NPORT; l++) begin
      co_valid[l] = 1'b0;
      co_msg[l]   = '0;
      sel         = 0;
      for (int v = NPORT-1; v >= 1; v--)
        if (cd_out_valid[v] && 32'(cd_out_link[v]) == l && l != 0) sel = v;
      if (sel != 0) begin
        co_valid[l]     = 1'b1;
        co_msg[l]       = cd_out_msg[sel];
        cd_out_ack[sel] = co_ready[l];
      end
    end
  end

  // incoming control: a forward message is for the port it arrives on, a
  // backward one (NOCYCLE) names its virtual node
  always_comb begin
    logic [PORT_W-1:0] tgt [NPORT];
    for (int l = 0; l < NPORT; l++) begin
      ci_ready[l] = 1'b0;
      tgt[l] = (ci_msg[l].mtype == CM_NOCYCLE) ? ci_msg[l].dst_port : PORT_W'(l);
    end
    for (int v = 0; v < NPORT; v++) begin
      cd_in_valid[v] = 1'b0;
      cd_in_msg[v]   = '0;
      cd_in_link[v]  = '0;
      for (int l = NPORT-1; l >= 1; l--) begin
        if (ci_valid[l] && tgt[l] == PORT_W'(v)) begin
          cd_in_valid[v] = 1'b1;
          cd_in_msg[v]   = ci_msg[l];
          cd_in_link[v]  = PORT_W'(l);
        end
      end
      if (cd_in_valid[v] && v != 0) ci_ready[cd_in_link[v]] = cd_in_ready[v];
    end
    // a message for the local port (never expected) is consumed and dropped
    for (int l = 1; l < NPORT; l++)
      if (ci_valid[l] && tgt[l] == P_LOCAL) ci_ready[l] = 1'b1;
  end

  // ---------------------------------------------------------------- counters
  function automatic logic [STAT_W-1:0] cnt1(input logic e [NPORT]);
    logic [STAT_W-1:0] n;
    n = '0;
    for (int i = 0; i < NPORT; i++) n += STAT_W'(e[i]);
    return n;
  endfunction

  logic e_blk [NPORT];
  logic e_stall [NPORT];
  always_comb begin
    for (int i = 0; i < NPORT; i++) begin
      e_blk[i]   = blk_valid && (32'(blk_idx) == i);
      e_stall[i] = want_stall[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stats <= '0;
    end else begin
      stats.blocked      <= stats.blocked      + cnt1(e_blk);
      stats.search       <= stats.search       + cnt1(e_srch);
      stats.failed       <= stats.failed       + cnt1(e_fail);
      stats.leader       <= stats.leader       + cnt1(e_lead);
      stats.rotated      <= stats.rotated      + cnt1(e_rot);
      stats.unmapped_rot <= stats.unmapped_rot + cnt1(e_unm);
      stats.dummy_rot    <= stats.dummy_rot    + cnt1(e_dum);
      stats.aux_wait     <= stats.aux_wait     + cnt1(e_aux);
      stats.reestablish  <= stats.reestablish  + cnt1(e_reest);
      stats.stall        <= stats.stall        + cnt1(e_stall);
      stats.rq_overflow  <= stats.rq_overflow  + cnt1(e_ovf);
    end
  end
endmodule
