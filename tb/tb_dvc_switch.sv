// tb_dvc_switch: one switch (node 14, row 2 col 2 of the default 6 x 6 mesh)
// with the testbench acting as its host and its four neighbours.
// It checks: circuits from the host to each direction leave on the right port
// (row-first routing), data and CDP use the channel the CEP got on that link,
// two circuits on one link get different channels, a CDP returns its channel
// (the next circuit gets the same channel again), circuits arriving from a
// neighbour are delivered to the host on the channel chosen there, and a
// neighbour that stops accepting makes the switch declare the buffer Blocked,
// start a search with a TEST on that link's control wires, and end the search
// when the NOCYCLE answer comes back.
module tb_dvc_switch;
  import dvc_pkg::*;
  localparam int MY = 14;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic lo_valid [NPORT], lo_rot [NPORT], lo_ready [NPORT];
  logic li_valid [NPORT], li_rot [NPORT], li_ready [NPORT];
  packet_t lo_pkt [NPORT], li_pkt [NPORT];
  logic co_valid [NPORT], co_ready [NPORT], ci_valid [NPORT], ci_ready [NPORT];
  ctrl_msg_t co_msg [NPORT], ci_msg [NPORT];
  logic rt_we; logic [NODE_W-1:0] rt_dest; logic [PORT_W-1:0] rt_port;
  stats_t stats;

  dvc_switch #(.MY_ID(MY), .TIMEOUT(40)) dut (.*);

  int checks = 0, failures = 0;
  packet_t got [NPORT][$];
  ctrl_msg_t cgot [NPORT][$];
  always @(posedge clk) if (rst_n)
    for (int p = 0; p < NPORT; p++) begin
      if (lo_valid[p] && (lo_ready[p] || lo_rot[p])) got[p].push_back(lo_pkt[p]);
      if (co_valid[p] && co_ready[p]) cgot[p].push_back(co_msg[p]);
    end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic packet_t mk(pkt_type_e t, int vc, int dest, int pay);
    packet_t p;
    p = '0; p.ptype = t; p.vc = VC_W'(vc); p.dest = NODE_W'(dest); p.payload = DATA_W'(pay);
    return p;
  endfunction

  task automatic send(int port, packet_t p);
    @(negedge clk);
    li_valid[port] = 1; li_pkt[port] = p;
    while (!li_ready[port]) @(negedge clk);
    @(negedge clk);
    li_valid[port] = 0;
  endtask

  // open a circuit from `port` on channel vc, send n data packets, close it
  task automatic circuit(int port, int vc, int dest, int n, int base);
    send(port, mk(PK_CEP, vc, dest, 0));
    for (int i = 0; i < n; i++) send(port, mk(PK_DATA, vc, 0, base + i));
    send(port, mk(PK_CDP, vc, 0, 0));
  endtask

  // check that port op carried CEP, n data packets (base..) and CDP on one channel
  task automatic expect_circuit(int op, int dest, int n, int base, output int vc);
    packet_t p;
    vc = -1;
    chk(got[op].size() == n + 2, $sformatf("port %0d carried %0d packets", op, got[op].size()));
    if (got[op].size() != n + 2) begin got[op].delete(); return; end
    p = got[op].pop_front();
    chk(p.ptype == PK_CEP && p.dest == dest, $sformatf("CEP to %0d on port %0d", dest, op));
    vc = int'(p.vc);
    chk(!is_bank_vc(p.vc), "CEP on a normal channel");
    for (int i = 0; i < n; i++) begin
      p = got[op].pop_front();
      chk(p.ptype == PK_DATA && int'(p.vc) == vc && p.payload == DATA_W'(base + i), "data in order on the channel");
    end
    p = got[op].pop_front();
    chk(p.ptype == PK_CDP && int'(p.vc) == vc, "CDP on the channel");
  endtask

  initial begin
    int vc, vc2, vc3;
    packet_t p;
    for (int i = 0; i < NPORT; i++) begin
      li_valid[i] = 0; li_rot[i] = 0; li_pkt[i] = '0; lo_ready[i] = 1;
      co_ready[i] = 1; ci_valid[i] = 0; ci_msg[i] = '0;
    end
    rt_we = 0; rt_dest = 0; rt_port = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. one circuit in every direction, row-first routes
    circuit(P_LOCAL, 1, 16, 3, 100); repeat (5) @(negedge clk); expect_circuit(P_EAST, 16, 3, 100, vc);
    circuit(P_LOCAL, 1, 2, 2, 200);  repeat (5) @(negedge clk); expect_circuit(P_NORTH, 2, 2, 200, vc);
    circuit(P_LOCAL, 1, 26, 2, 300); repeat (5) @(negedge clk); expect_circuit(P_SOUTH, 26, 2, 300, vc);
    circuit(P_LOCAL, 1, 12, 2, 400); repeat (5) @(negedge clk); expect_circuit(P_WEST, 12, 2, 400, vc);
    circuit(P_LOCAL, 1, 17, 2, 500); repeat (5) @(negedge clk); expect_circuit(P_EAST, 17, 2, 500, vc);
    // 2. two open circuits on the east link get different channels
    send(P_LOCAL, mk(PK_CEP, 2, 16, 0));
    send(P_LOCAL, mk(PK_CEP, 3, 16, 0));
    repeat (5) @(negedge clk);
    chk(got[P_EAST].size() == 2 && got[P_EAST][0].vc != got[P_EAST][1].vc, "two circuits, two channels");
    vc2 = int'(got[P_EAST][0].vc);
    got[P_EAST].delete();
    send(P_LOCAL, mk(PK_CDP, 2, 0, 0));
    repeat (5) @(negedge clk);
    got[P_EAST].delete();
    // 3. the released channel is handed out again
    send(P_LOCAL, mk(PK_CEP, 4, 16, 0));
    repeat (5) @(negedge clk);
    chk(got[P_EAST].size() == 1 && int'(got[P_EAST][0].vc) == vc2, "released channel reused");
    got[P_EAST].delete();
    // 4. a circuit from the west neighbour to this node's host
    circuit(P_WEST, 6, MY, 3, 600); repeat (5) @(negedge clk); expect_circuit(P_LOCAL, MY, 3, 600, vc3);
    // 5. east neighbour stops accepting: blocked buffer, search, NOCYCLE
    lo_ready[P_EAST] = 0;
    send(P_WEST, mk(PK_CEP, 7, 17, 0));
    for (int i = 0; i < 4; i++) send(P_WEST, mk(PK_DATA, 7, 0, 700 + i));
    cgot[P_EAST].delete();
    repeat (200) @(negedge clk);
    chk(stats.blocked != 0 && stats.search != 0, "blocked buffer declared, search started");
    chk(cgot[P_EAST].size() != 0 && cgot[P_EAST][0].mtype == CM_TEST &&
        cgot[P_EAST][0].maxid == VNODE_W'(MY * NPORT + P_WEST) && cgot[P_EAST][0].src_port == P_WEST,
        "TEST sent east with the west virtual node's id");
    if (cgot[P_EAST].size() != 0) begin
      ctrl_msg_t m;
      m = '0; m.mtype = CM_NOCYCLE; m.seq = cgot[P_EAST][$].seq; m.dst_port = P_WEST; m.src_port = P_WEST;
      @(negedge clk); ci_valid[P_EAST] = 1; ci_msg[P_EAST] = m;
      @(negedge clk); ci_valid[P_EAST] = 0;
    end
    repeat (3) @(negedge clk);
    chk(stats.failed != 0, "NOCYCLE ends the search");
    // 6. neighbour accepts again: everything leaves in order
    lo_ready[P_EAST] = 1;
    got[P_EAST].delete();
    repeat (20) @(negedge clk);
    chk(got[P_EAST].size() == 5 && got[P_EAST][0].ptype == PK_CEP && got[P_EAST][4].payload == 703,
        "blocked circuit drains");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
