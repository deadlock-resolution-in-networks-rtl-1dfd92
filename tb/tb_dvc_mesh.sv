// tb_dvc_mesh: end-to-end test of the 6 x 6 DVC mesh at its default
// parameters.
//
// Every host runs the same traffic generator: it opens a circuit with a CEP on
// a channel of its host link, sends LEN data packets on it and closes it with a
// CDP. Payloads carry the source node and a per-source sequence number; the
// testbench remembers where each data packet was sent and checks that it is
// delivered exactly once, at the right node.
//
// The traffic follows the deadlock-prone experiment: the routing tables send
// circuits to the two opposite corners (row 1, col 4) and (row 4, col 1) of the
// inner square column-first, everything else row-first. Light uniform traffic
// alternates with bursts in which those two corners send only to each other
// and so do the other two corners (1,1) and (4,4), which closes a cycle of
// dependencies around the square. The test then stops injecting and requires
// that every packet is delivered, which needs the deadlock resolution to break
// the cycles. It counts each mechanism (blocked buffers, searches, failed
// searches, found cycles, rotations, packets parked for a channel, neighbour
// stalls) and fails if one never happened. Rotations of unmapped packets onto
// the free channel bank, dummy rotations and circuit re-establishment are rare
// in this traffic; they are reported here and exercised in tb_input_port.
module tb_dvc_mesh;
  import dvc_pkg::*;

  localparam int ROWS = 6, COLS = 6, NN = ROWS * COLS;
  localparam int LEN = 4;                 // data packets per circuit
  localparam int PHASES = 4;              // light, burst, light, burst
  localparam int PHASE_CYC = 4000;
  localparam int DRAIN_MAX = 400000;
  localparam int MAXSEQ = 1024;
  localparam int D1 = 1 * COLS + 4, D2 = 4 * COLS + 1;   // column-first corners
  localparam int C1 = 1 * COLS + 1, C2 = 4 * COLS + 4;   // the other two corners

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      host_in_valid  [NN];
  packet_t   host_in_pkt    [NN];
  logic      host_in_ready  [NN];
  logic      host_out_valid [NN];
  packet_t   host_out_pkt   [NN];
  logic      host_out_ready [NN];
  logic               rt_we;
  logic [NODE_W-1:0]  rt_node, rt_dest;
  logic [PORT_W-1:0]  rt_port;
  stats_t    stats [NN];

  dvc_mesh dut (.*);

  int checks = 0, failures = 0;
  int sent = 0, delivered = 0;
  int sent_dest [NN][MAXSEQ];
  bit got       [NN][MAXSEQ];
  int seqno     [NN];
  bit inject_en, burst;

  // --------------------------------------------------------- host generators
  typedef enum int { H_IDLE, H_CEP, H_DATA, H_CDP } hstate_e;
  hstate_e hs   [NN];
  int      hdst [NN];
  int      hvc  [NN];
  int      hcnt [NN];

  function automatic int pick_dest(int n);
    int d;
    if (burst) begin
      if (n == D1) return D2;
      if (n == D2) return D1;
      if (n == C1) return C2;
      if (n == C2) return C1;
    end
    do d = int'($urandom_range(NN - 1)); while (d == n);
    return d;
  endfunction

  always_comb begin
    for (int n = 0; n < NN; n++) begin
      host_in_valid[n] = (hs[n] != H_IDLE);
      host_in_pkt[n]   = '0;
      host_in_pkt[n].vc = VC_W'(hvc[n]);
      unique case (hs[n])
        H_CEP:  begin host_in_pkt[n].ptype = PK_CEP; host_in_pkt[n].dest = NODE_W'(hdst[n]); end
        H_DATA: begin host_in_pkt[n].ptype = PK_DATA;
                      host_in_pkt[n].payload = {NODE_W'(n), 10'(seqno[n])}; end
        H_CDP:  host_in_pkt[n].ptype = PK_CDP;
        default: ;
      endcase
    end
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int n = 0; n < NN; n++) begin
        hs[n] <= H_IDLE; hdst[n] <= 0; hvc[n] <= 0; hcnt[n] <= 0; seqno[n] <= 0;
      end
    end else begin
      for (int n = 0; n < NN; n++) begin
        unique case (hs[n])
          H_IDLE: begin
            // light load: about 1 circuit per 120 cycles per node; burst: back to back
            bit corner;
            corner = (n == D1 || n == D2 || n == C1 || n == C2);
            if (inject_en && seqno[n] + LEN < MAXSEQ &&
                ((burst && corner) || $urandom_range(burst ? 3 : 119) == 0)) begin
              hdst[n] <= pick_dest(n);
              hvc[n]  <= (hvc[n] + 1) % (NVC - NPORT);
              hs[n]   <= H_CEP;
            end
          end
          H_CEP: if (host_in_ready[n]) begin hs[n] <= H_DATA; hcnt[n] <= 0; end
          H_DATA: if (host_in_ready[n]) begin
            sent_dest[n][seqno[n]] = hdst[n];
            seqno[n] <= seqno[n] + 1;
            sent++;
            if (hcnt[n] == LEN - 1) hs[n] <= H_CDP;
            hcnt[n] <= hcnt[n] + 1;
          end
          H_CDP: if (host_in_ready[n]) hs[n] <= H_IDLE;
          default: ;
        endcase
      end
    end
  end

  // ------------------------------------------------------------------ sinks
  always_comb for (int n = 0; n < NN; n++) host_out_ready[n] = 1'b1;

  always @(posedge clk) begin
    if (rst_n) begin
      for (int n = 0; n < NN; n++) begin
        if (host_out_valid[n] && host_out_pkt[n].ptype == PK_DATA) begin
          int s, q;
          s = int'(host_out_pkt[n].payload[15:10]);
          q = int'(host_out_pkt[n].payload[9:0]);
          checks++;
          if (s >= NN || got[s][q] || sent_dest[s][q] != n) begin
            failures++;
            $display("FAIL: node %0d got bad packet src=%0d seq=%0d (dest %0d, dup %0d)",
                     n, s, q, (s < NN) ? sent_dest[s][q] : -1, (s < NN) ? got[s][q] : 0);
          end else begin
            got[s][q] = 1'b1;
          end
          delivered++;
        end
      end
    end
  end

  // ------------------------------------------------------------- statistics
  function automatic int total(input int f);
    int t;
    t = 0;
    for (int n = 0; n < NN; n++) begin
      case (f)
        0:  t += int'(stats[n].blocked);
        1:  t += int'(stats[n].search);
        2:  t += int'(stats[n].failed);
        3:  t += int'(stats[n].leader);
        4:  t += int'(stats[n].rotated);
        5:  t += int'(stats[n].unmapped_rot);
        6:  t += int'(stats[n].dummy_rot);
        7:  t += int'(stats[n].aux_wait);
        8:  t += int'(stats[n].reestablish);
        9:  t += int'(stats[n].stall);
        default: t += int'(stats[n].rq_overflow);
      endcase
    end
    return t;
  endfunction

  string names [11] = '{"blocked buffer", "cycle search", "failed search", "cycle found",
                        "rotation", "unmapped packet to free bank", "dummy rotation",
                        "packet waiting for channel", "circuit re-established",
                        "neighbour stall", "rotation queue overflow"};

  function automatic int busy_hosts();
    int b;
    b = 0;
    for (int n = 0; n < NN; n++) if (hs[n] != H_IDLE) b++;
    return b;
  endfunction

  // ------------------------------------------------------------------- main
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    int t0;
    inject_en = 1'b0;
    burst = 1'b0;
    rt_we = 1'b0; rt_node = '0; rt_dest = '0; rt_port = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    // column-first routes to the two special corners, in every switch
    for (int n = 0; n < NN; n++) begin
      for (int k = 0; k < 2; k++) begin
        int d, r, c, dr, dc;
        d = (k == 0) ? D1 : D2;
        r = n / COLS; c = n % COLS; dr = d / COLS; dc = d % COLS;
        rt_we   <= 1'b1;
        rt_node <= NODE_W'(n);
        rt_dest <= NODE_W'(d);
        rt_port <= (dr > r) ? P_SOUTH : (dr < r) ? P_NORTH :
                   (dc > c) ? P_EAST  : (dc < c) ? P_WEST  : P_LOCAL;
        @(posedge clk);
      end
    end
    rt_we <= 1'b0;
    inject_en = 1'b1;
    for (int ph = 0; ph < PHASES; ph++) begin
      burst = (ph % 2 == 1);
      repeat (PHASE_CYC) @(posedge clk);
    end
    inject_en = 1'b0;
    burst = 1'b0;
    t0 = cyc;
    // wait for the hosts to finish their circuits, then for delivery
    while (busy_hosts() != 0) @(posedge clk);
    while (delivered < sent && cyc - t0 < DRAIN_MAX) @(posedge clk);
    repeat (50) @(posedge clk);
    $display("sent %0d delivered %0d, drained in %0d cycles", sent, delivered, cyc - t0);
    checks++;
    if (delivered != sent) begin
      failures++;
      $display("FAIL: %0d packets not delivered", sent - delivered);
    end
    for (int f = 0; f < 11; f++) begin
      int t;
      t = total(f);
      $display("  %-32s %0d", names[f], t);
      checks++;
      // moving an unmapped packet to the free bank, dummy rotation and
      // re-establishment are reported here and checked in tb_input_port
      if (f == 10 ? (t != 0) : (t == 0 && f != 5 && f != 6 && f != 8)) begin
        failures++;
        $display("FAIL: mechanism '%s' count %0d", names[f], t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * (PHASES * PHASE_CYC + DRAIN_MAX + 20000));
    failures++;
    $display("FAIL: watchdog, sent %0d delivered %0d", sent, delivered);
    for (int f = 0; f < 11; f++) $display("  %-32s %0d", names[f], total(f));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
