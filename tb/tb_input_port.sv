// tb_input_port: directed test of one input port (port 1) with the channel
// allocator and routing table modelled in the testbench (every destination is
// routed east, grants are switched on and off by the test).
// It checks: CEP mapping and channel translation; data and CDP following the
// mapping and the CDP clearing it; a CEP without a free channel waiting in the
// Auxiliary Buffer with the link refused; rotation of a mapped head packet,
// of a dummy when nothing waits for the successor, and of an unmapped CEP and
// an unmapped data packet onto the port's free channel bank channel (CEP,
// packet, CDP, one timestamp step each); re-establishment of a cut circuit
// with a new CEP ahead of the data packet; rotated arrivals being held while
// in cycle mode and enqueued afterwards.
module tb_input_port;
  import dvc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_rot, in_ready, va_req, va_gnt, sel_ok, deq_valid;
  packet_t in_pkt, head [NPORT], rot_pkt;
  logic [NODE_W-1:0] rt_dest;
  logic [PORT_W-1:0] rt_port, va_port, deq_q, succ, rot_port, next_hop;
  logic [VC_W-1:0] va_vc;
  logic [NPORT-1:0] q_nonempty;
  logic cycle_mode, rot_start, rot_valid, rot_ack, rot_arrived, ts_inc;
  logic [TS_W-1:0] ts_in;
  logic nonempty, moved, rq_room;
  logic ev_aux_wait, ev_reestablish, ev_unmapped_rot, ev_dummy_rot, ev_rq_overflow;
  logic grant_en;

  input_port #(.MY_PORT(1), .CAP(8), .RQ(8)) dut (.*, .my_node(NODE_W'(9)));

  assign rt_port = P_EAST;
  assign va_gnt  = va_req && grant_en && va_port == P_EAST;
  assign va_vc   = 4'd5;
  assign rot_ack = rot_valid;

  int checks = 0, failures = 0;
  int n_aux = 0, n_reest = 0, n_unm = 0, n_dum = 0, n_ts = 0;
  packet_t rot_seen [$];
  always @(posedge clk) begin
    if (ev_aux_wait) n_aux++;
    if (ev_reestablish) n_reest++;
    if (ev_unmapped_rot) n_unm++;
    if (ev_dummy_rot) n_dum++;
    if (ts_inc) n_ts++;
    if (rot_valid) rot_seen.push_back(rot_pkt);
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

  task automatic send(packet_t p, bit rot = 0);
    @(negedge clk);
    in_valid = 1; in_pkt = p; in_rot = rot;
    if (!rot) while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 0; in_rot = 0;
  endtask

  task automatic pop(input int q, output packet_t p);
    @(negedge clk);
    p = head[q];
    deq_valid = 1; deq_q = PORT_W'(q);
    @(negedge clk);
    deq_valid = 0;
  endtask

  task automatic rotate(input int s);
    @(negedge clk);
    rot_start = 1; succ = PORT_W'(s);
    @(negedge clk);
    rot_start = 0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    packet_t p;
    in_valid = 0; in_rot = 0; in_pkt = '0; deq_valid = 0; deq_q = 0;
    cycle_mode = 0; rot_start = 0; succ = 0; ts_in = 8'd40; grant_en = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. circuit on vc 3 to node 7
    send(mk(PK_CEP, 3, 7, 0));
    repeat (3) @(negedge clk);
    chk(q_nonempty[P_EAST] && head[P_EAST].ptype == PK_CEP && head[P_EAST].vc == 5 &&
        head[P_EAST].dest == 7, "CEP mapped to output channel 5");
    send(mk(PK_DATA, 3, 0, 16'h1234));
    send(mk(PK_CDP, 3, 0, 0));
    pop(P_EAST, p);
    pop(P_EAST, p); chk(p.ptype == PK_DATA && p.vc == 5 && p.payload == 16'h1234, "data translated");
    pop(P_EAST, p); chk(p.ptype == PK_CDP && p.vc == 5, "CDP translated");
    chk(dut.u_imt.tbl[3].mapped == 0, "CDP clears mapping");
    // 2. no channel free: the CEP stays in the Auxiliary Buffer (every CEP
    //    passes through it on its way to a channel)
    grant_en = 0;
    send(mk(PK_CEP, 4, 20, 0));
    repeat (3) @(negedge clk);
    chk(dut.aux_valid && !in_ready && n_aux == 2, "unmapped CEP held, link refused");
    chk(next_hop == P_EAST, "next hop is the waiting packet's port");
    // 3. dummy rotation towards south (nothing waits there)
    rot_seen.delete();
    rotate(P_SOUTH);
    chk(rot_seen.size() == 1 && rot_seen[0].ptype == PK_DUMMY && rot_port == P_SOUTH && n_dum == 1,
        "dummy rotated");
    // 4. unmapped CEP rotated onto bank channel 12 (port 1 of 11..15)
    rot_seen.delete();
    rotate(P_EAST);
    chk(rot_seen.size() == 2 && rot_seen[0].ptype == PK_CEP && rot_seen[0].vc == 12 &&
        rot_seen[0].dest == 20 && rot_seen[1].ptype == PK_CDP && rot_seen[1].vc == 12 &&
        rot_seen[1].tear_id == 9 && rot_seen[1].tstamp == 40, "unmapped CEP: CEP, CDP on bank channel");
    chk(!dut.aux_valid && n_unm == 1 && n_ts == 1, "Auxiliary Buffer freed, timestamp advanced");
    chk(dut.u_imt.tbl[4].dest_known && !dut.u_imt.tbl[4].mapped && dut.u_imt.tbl[4].dest == 20,
        "destination kept for the cut circuit");
    // 5. data on the cut circuit, still no channel: unmapped data rotation
    send(mk(PK_DATA, 4, 0, 16'h0AAA));
    repeat (2) @(negedge clk);
    chk(dut.aux_valid, "data on cut circuit waits for a channel");
    rot_seen.delete();
    rotate(P_EAST);
    chk(rot_seen.size() == 3 && rot_seen[0].ptype == PK_CEP && rot_seen[0].dest == 20 &&
        rot_seen[1].ptype == PK_DATA && rot_seen[1].vc == 12 && rot_seen[1].payload == 16'h0AAA &&
        rot_seen[2].ptype == PK_CDP && n_unm == 2 && n_ts == 2, "unmapped data: CEP, data, CDP");
    // 6. re-establishment once a channel is free
    grant_en = 1;
    send(mk(PK_DATA, 4, 0, 16'h0BBB));
    repeat (4) @(negedge clk);
    pop(P_EAST, p); chk(p.ptype == PK_CEP && p.vc == 5 && p.dest == 20 && p.tear_id == 9, "re-establishing CEP");
    pop(P_EAST, p); chk(p.ptype == PK_DATA && p.vc == 5 && p.payload == 16'h0BBB, "data follows on new channel");
    chk(n_reest == 1, "one re-establishment");
    // 7. mapped rotation takes the head of the successor queue
    send(mk(PK_DATA, 4, 0, 16'h0CCC));
    rot_seen.delete();
    rotate(P_EAST);
    chk(rot_seen.size() == 1 && rot_seen[0].payload == 16'h0CCC && !q_nonempty[P_EAST], "mapped head rotated");
    // 8. rotated arrival while in cycle mode is held, then enqueued
    cycle_mode = 1;
    send(mk(PK_DATA, 4, 0, 16'h0DDD), 1);
    repeat (3) @(negedge clk);
    chk(!q_nonempty[P_EAST] && dut.rq_cnt == 1, "held in cycle mode");
    cycle_mode = 0;
    repeat (3) @(negedge clk);
    chk(q_nonempty[P_EAST] && head[P_EAST].payload == 16'h0DDD, "enqueued after cycle mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
