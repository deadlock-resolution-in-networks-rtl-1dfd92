// cycle_detector: deadlock cycle search and rotation commit for one virtual
// node, that is, for one switch input port buffer.
//
// The physical network of input-buffered switches is treated as a virtual
// network of centrally buffered nodes, one per input port. The packet at the
// head of a blocked input port waits for an output port; the input port of the
// neighbour behind that output is this virtual node's successor. The search
// runs along successors with three control messages:
//
//  * TEST(seq, max). A node whose buffer is declared Blocked increments its
//    sequence number and sends TEST carrying its own virtual node id to its
//    successor. A blocked receiver forwards TEST to its own successor, with
//    max raised to its own id when that is larger, and remembers the sender as
//    its predecessor. A receiver that is not blocked answers NOCYCLE. A node
//    that gets back the same max it last forwarded has closed a cycle and
//    becomes its leader.
//  * CYCLE. The leader enters cycle mode and sends CYCLE to its successor; each
//    member enters cycle mode (stops inflow from its neighbour, suspends circuit
//    operations) and forwards it. When CYCLE returns, every member is prepared
//    and the leader starts the rotation (rot_start).
//  * NOCYCLE. Sent back to the predecessor when a node finds it is not blocked
//    (on a TEST, or because its packets moved while it was searching). It
//    travels backwards, returning every node it passes to idle, which cancels
//    the search, also for members that have prepared but not yet rotated.
//
// Sequence numbers keep iterations apart: a message older than the node's
// number is dropped, a newer one makes the node adopt that number. A member in
// cycle mode rotates its own packet as soon as the first rotated packet from its
// predecessor arrives (rot_arrived), then leaves cycle mode; the leader leaves
// cycle mode when the rotation has come round to it.
//
// Interface: one incoming message per cycle (in_valid/in_ready; in_link is the
// link it came on) and one outgoing message slot (out_valid/out_ack, out_link
// the link to send it on). The node accepts a message in every cycle except the
// one in which it handles a rotation arrival; a message it has to send while
// the slot is still occupied replaces the unsent one, and the searches it
// belonged to are repeated by later timeouts. Counters of searches, failed searches and found cycles are
// exported as pulses.
//
// Design choices beyond the algorithm's description: the leader test compares
// with the value the node last forwarded rather than with its own id, so that a
// search started by a higher-numbered node outside the cycle still finds the
// cycle; a newer sequence number is adopted rather than queued; a node keeps the
// successor it chose for the whole iteration; and a node that has entered
// cycle mode but sees no rotation within COMMIT_TIMEOUT cycles (its CYCLE or
// the rotation was lost because a member moved on to a newer iteration) leaves
// cycle mode on its own.
//
// Lint note: the dst_port field of an incoming message is not read here; the
// switch has already used it to deliver the message to this node.
module cycle_detector
  import dvc_pkg::*;
#(
  parameter int unsigned COMMIT_TIMEOUT = 1024
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [VNODE_W-1:0] my_vid,
  input  logic [PORT_W-1:0]  my_port,
  // from the blocked-buffer identification and the input port
  input  logic               trigger,
  input  logic               blocked,
  input  logic [PORT_W-1:0]  next_hop,
  // incoming control message
  input  logic               in_valid,
  input  ctrl_msg_t          in_msg,
  input  logic [PORT_W-1:0]  in_link,
  output logic               in_ready,
  // outgoing control message
  output logic               out_valid,
  output ctrl_msg_t          out_msg,
  output logic [PORT_W-1:0]  out_link,
  input  logic               out_ack,
  // rotation
  output logic               cycle_mode,
  output logic [PORT_W-1:0]  succ,
  output logic               rot_start,
  input  logic               rot_arrived,
  // statistics pulses
  output logic               ev_search,
  output logic               ev_failed,
  output logic               ev_leader,
  output logic               ev_rotated
);
  typedef enum logic [2:0] {
    S_IDLE, S_SEARCH, S_LEADER_WAIT, S_MEMBER, S_ROT_WAIT
  } state_e;

  state_e             state;
  logic [SEQ_W-1:0]   seq;
  logic [VNODE_W-1:0] fwd_max;
  logic               have_pred;
  logic [PORT_W-1:0]  pred_link;
  logic [PORT_W-1:0]  pred_port;

  logic rot_now;
  assign rot_now    = rot_arrived && ((state == S_MEMBER) || (state == S_ROT_WAIT));
  // A rotation arrival is handled before any message, so none is taken then.
  // Otherwise a message is always taken, whether or not the outgoing slot is
  // free: waiting for it could close a cycle of control links in which every
  // node waits for its successor. A reply then replaces an unsent message.
  assign in_ready   = !rot_now;
  assign cycle_mode = (state == S_LEADER_WAIT) || (state == S_MEMBER) || (state == S_ROT_WAIT);

  logic [$clog2(COMMIT_TIMEOUT+1)-1:0] ctimer;
  logic               ctime_out;
  assign ctime_out = cycle_mode && (ctimer == '0);

  logic               take;
  logic signed [SEQ_W-1:0] sdiff;
  logic               is_old, is_new, same;
  assign take   = in_valid && in_ready;
  assign sdiff  = $signed(in_msg.seq - seq);
  assign is_old = sdiff < 0;
  assign is_new = sdiff > 0;
  assign same   = sdiff == 0;

  function automatic ctrl_msg_t mk(input ctrl_type_e t, input logic [SEQ_W-1:0] s,
                                   input logic [VNODE_W-1:0] m, input logic [PORT_W-1:0] sp,
                                   input logic [PORT_W-1:0] dp);
    ctrl_msg_t c;
    c.mtype = t; c.seq = s; c.maxid = m; c.src_port = sp; c.dst_port = dp;
    return c;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      seq        <= '0;
      fwd_max    <= '0;
      have_pred  <= 1'b0;
      pred_link  <= '0;
      pred_port  <= '0;
      succ       <= '0;
      out_valid  <= 1'b0;
      out_msg    <= '0;
      out_link   <= '0;
      rot_start  <= 1'b0;
      ev_search  <= 1'b0;
      ev_failed  <= 1'b0;
      ev_leader  <= 1'b0;
      ev_rotated <= 1'b0;
      ctimer     <= '0;
    end else begin
      if (!cycle_mode) ctimer <= ($clog2(COMMIT_TIMEOUT+1))'(COMMIT_TIMEOUT);
      else if (ctimer != '0) ctimer <= ctimer - 1'b1;
      rot_start  <= 1'b0;
      ev_search  <= 1'b0;
      ev_failed  <= 1'b0;
      ev_leader  <= 1'b0;
      ev_rotated <= 1'b0;
      if (out_valid && out_ack) out_valid <= 1'b0;

      if (rot_now) begin
        rot_start  <= (state == S_MEMBER);
        state      <= S_IDLE;
        ev_rotated <= 1'b1;
      end else if (ctime_out) begin
        state     <= S_IDLE;
        ev_failed <= 1'b1;
      end else if (take) begin
        unique case (in_msg.mtype)
          CM_TEST: begin
            if (is_old || ((state != S_IDLE) && (state != S_SEARCH))) begin
              // stale, or this node is already committed: drop
            end else if (!blocked) begin
              out_valid <= 1'b1;
              out_link  <= in_link;
              out_msg   <= mk(CM_NOCYCLE, in_msg.seq, '0, my_port, in_msg.src_port);
              if (is_new) begin
                seq   <= in_msg.seq;
                state <= S_IDLE;
              end
            end else if (state == S_SEARCH && same && in_msg.maxid == fwd_max) begin
              // the value this node sent has come back: a cycle, this node leads
              state     <= S_LEADER_WAIT;
              have_pred <= 1'b1;
              pred_link <= in_link;
              pred_port <= in_msg.src_port;
              out_valid <= 1'b1;
              out_link  <= succ;
              out_msg   <= mk(CM_CYCLE, seq, fwd_max, my_port, '0);
              ev_leader <= 1'b1;
            end else if (state == S_IDLE || is_new || in_msg.maxid > fwd_max) begin
              seq       <= in_msg.seq;
              fwd_max   <= (in_msg.maxid > my_vid) ? in_msg.maxid : my_vid;
              have_pred <= 1'b1;
              pred_link <= in_link;
              pred_port <= in_msg.src_port;
              if (state == S_IDLE || is_new) succ <= next_hop;
              state     <= S_SEARCH;
              out_valid <= 1'b1;
              out_link  <= (state == S_IDLE || is_new) ? next_hop : succ;
              out_msg   <= mk(CM_TEST, in_msg.seq,
                              (in_msg.maxid > my_vid) ? in_msg.maxid : my_vid, my_port, '0);
            end
          end
          CM_NOCYCLE: begin
            if (same && (state == S_SEARCH || state == S_LEADER_WAIT || state == S_MEMBER)) begin
              state     <= S_IDLE;
              ev_failed <= 1'b1;
              if (have_pred && state != S_LEADER_WAIT) begin
                out_valid <= 1'b1;
                out_link  <= pred_link;
                out_msg   <= mk(CM_NOCYCLE, seq, '0, my_port, pred_port);
              end
            end
          end
          default: begin // CM_CYCLE
            if (same && state == S_SEARCH) begin
              state     <= S_MEMBER;
              out_valid <= 1'b1;
              out_link  <= succ;
              out_msg   <= mk(CM_CYCLE, seq, fwd_max, my_port, '0);
            end else if (same && state == S_LEADER_WAIT) begin
              state     <= S_ROT_WAIT;
              rot_start <= 1'b1;
            end
          end
        endcase
      end else if (!out_valid && state == S_SEARCH && !blocked) begin
        // packets moved: not part of a deadlock, cancel the search
        state     <= S_IDLE;
        ev_failed <= 1'b1;
        if (have_pred) begin
          out_valid <= 1'b1;
          out_link  <= pred_link;
          out_msg   <= mk(CM_NOCYCLE, seq, '0, my_port, pred_port);
        end
      end else if (!out_valid && trigger && (state == S_IDLE || state == S_SEARCH)
                   && next_hop != P_LOCAL) begin
        seq       <= seq + SEQ_W'(1);
        fwd_max   <= my_vid;
        have_pred <= 1'b0;
        succ      <= next_hop;
        state     <= S_SEARCH;
        out_valid <= 1'b1;
        out_link  <= next_hop;
        out_msg   <= mk(CM_TEST, seq + SEQ_W'(1), my_vid, my_port, '0);
        ev_search <= 1'b1;
      end
    end
  end
endmodule
