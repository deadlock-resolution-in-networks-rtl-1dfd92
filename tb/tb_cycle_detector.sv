// tb_cycle_detector: three virtual nodes with ids 10, 30 and 20 wired in a
// ring (each one's successor link leads to the next, the reverse link back).
// Case 1: all are blocked and node 0 starts a search; the testbench expects
// the node with the largest id (node 1) to become the only leader, every node
// to enter cycle mode, the rotation to go once round the ring starting at the
// leader, and all nodes to return to idle. Case 2: node 2 is not blocked; the
// search must be cancelled with NOCYCLE back to the initiator, with no cycle
// mode anywhere. Case 3: a message with an older sequence number is ignored.
module tb_cycle_detector;
  import dvc_pkg::*;
  localparam int N = 3;
  localparam logic [PORT_W-1:0] FWD = 3'd2, BWD = 3'd4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic trigger [N], blocked [N], in_valid [N], in_ready [N], out_valid [N], out_ack [N];
  ctrl_msg_t in_msg [N], out_msg [N];
  logic [PORT_W-1:0] in_link [N], out_link [N], succ [N];
  logic cycle_mode [N], rot_start [N], rot_arrived [N];
  logic ev_search [N], ev_failed [N], ev_leader [N], ev_rotated [N];
  int vid [N] = '{10, 30, 20};

  for (genvar i = 0; i < N; i++) begin : g
    cycle_detector #(.COMMIT_TIMEOUT(200)) u (
      .clk, .rst_n, .my_vid(VNODE_W'(vid[i])), .my_port(BWD),
      .trigger(trigger[i]), .blocked(blocked[i]), .next_hop(FWD),
      .in_valid(in_valid[i]), .in_msg(in_msg[i]), .in_link(in_link[i]), .in_ready(in_ready[i]),
      .out_valid(out_valid[i]), .out_msg(out_msg[i]), .out_link(out_link[i]), .out_ack(out_ack[i]),
      .cycle_mode(cycle_mode[i]), .succ(succ[i]), .rot_start(rot_start[i]), .rot_arrived(rot_arrived[i]),
      .ev_search(ev_search[i]), .ev_failed(ev_failed[i]), .ev_leader(ev_leader[i]), .ev_rotated(ev_rotated[i]));
  end

  // ring wiring: a node's FWD link reaches the next node, its BWD link the
  // previous one; at most one message per receiver per cycle (lowest sender)
  logic inj_valid; ctrl_msg_t inj_msg; int inj_to;
  always_comb begin
    for (int i = 0; i < N; i++) begin
      in_valid[i] = 0; in_msg[i] = '0; in_link[i] = '0; out_ack[i] = 0;
    end
    for (int i = N - 1; i >= 0; i--) begin
      if (out_valid[i]) begin
        int t;
        t = (out_link[i] == FWD) ? (i + 1) % N : (i + N - 1) % N;
        in_valid[t] = 1; in_msg[t] = out_msg[i]; in_link[t] = (out_link[i] == FWD) ? BWD : FWD;
      end
    end
    for (int i = 0; i < N; i++) if (out_valid[i]) begin
      int t;
      t = (out_link[i] == FWD) ? (i + 1) % N : (i + N - 1) % N;
      out_ack[i] = in_ready[t] && in_msg[t] == out_msg[i];
    end
    if (inj_valid) begin in_valid[inj_to] = 1; in_msg[inj_to] = inj_msg; in_link[inj_to] = BWD; end
  end

  int checks = 0, failures = 0;
  int leaders [N], rots [N], fails [N], modes [N];
  int rot_order [$];
  always @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      rot_arrived[i] <= rot_start[(i + N - 1) % N];
      if (ev_leader[i]) leaders[i]++;
      if (rot_start[i]) begin rots[i]++; rot_order.push_back(i); end
      if (ev_failed[i]) fails[i]++;
      if (cycle_mode[i]) modes[i]++;
    end
  end

  task automatic clear();
    for (int i = 0; i < N; i++) begin leaders[i] = 0; rots[i] = 0; fails[i] = 0; modes[i] = 0; end
    rot_order.delete();
  endtask

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin trigger[i] = 0; blocked[i] = 1; rot_arrived[i] = 0; end
    inj_valid = 0; inj_msg = '0; inj_to = 0;
    clear();
    repeat (2) @(posedge clk);
    rst_n = 1;
    // case 1
    @(negedge clk); trigger[0] = 1; @(negedge clk); trigger[0] = 0;
    repeat (40) @(negedge clk);
    chk(leaders[1] == 1 && leaders[0] == 0 && leaders[2] == 0, "one leader, the largest id");
    chk(modes[0] > 0 && modes[1] > 0 && modes[2] > 0, "all members in cycle mode");
    chk(rots[0] == 1 && rots[1] == 1 && rots[2] == 1, "each node rotates once");
    chk(rot_order.size() == 3 && rot_order[0] == 1 && rot_order[1] == 2 && rot_order[2] == 0,
        "rotation starts at the leader and follows the ring");
    chk(!cycle_mode[0] && !cycle_mode[1] && !cycle_mode[2], "all back to normal mode");
    chk(g[0].u.seq == g[1].u.seq && g[1].u.seq == g[2].u.seq, "sequence numbers agree");
    // case 2
    clear();
    blocked[2] = 0;
    @(negedge clk); trigger[0] = 1; @(negedge clk); trigger[0] = 0;
    repeat (40) @(negedge clk);
    chk(leaders[0] + leaders[1] + leaders[2] == 0, "no leader without a cycle");
    chk(modes[0] + modes[1] + modes[2] == 0, "no cycle mode without a cycle");
    chk(fails[0] == 1 && fails[1] == 1, "search cancelled back to the initiator");
    chk(g[0].u.state == 0 && g[1].u.state == 0, "initiator and member idle");
    // case 3: stale TEST is dropped, no reply
    clear();
    blocked[2] = 1;
    @(negedge clk);
    inj_valid = 1; inj_to = 1; inj_msg = '0; inj_msg.mtype = CM_TEST;
    inj_msg.seq = g[1].u.seq - 8'd1; inj_msg.maxid = 9'd99;
    @(negedge clk); inj_valid = 0;
    repeat (10) @(negedge clk);
    chk(!out_valid[1] && g[1].u.state == 0 && leaders[1] == 0, "stale message ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
