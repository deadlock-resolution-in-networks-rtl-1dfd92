// input_port: one input port of a Dynamic Virtual Circuit switch, with the
// packet handling that deadlock rotation needs.
//
// Every packet that reaches the port is translated through the Input Mapping
// Table and stored, already carrying its output virtual channel, in the DAMQ
// buffer queue of its output port:
//  * a data packet on an established circuit is enqueued at once;
//  * a CEP takes the output port from the routing table and a free virtual
//    channel from that port's allocator, records the mapping and is enqueued;
//  * a CDP is enqueued on its circuit's channel and clears the mapping;
//  * a data packet on a circuit that was cut at this switch re-establishes it:
//    the switch creates a CEP to the destination kept in the table, maps the
//    circuit on a new channel and sends the CEP ahead of the packet.
// A packet that has to wait for a virtual channel (unmapped) is held in the
// one-packet Auxiliary Buffer. While the Auxiliary Buffer is occupied, or the
// DAMQ buffer is full, the port refuses packets from its neighbour (in_ready
// low).
//
// Deadlock rotation. While the port's cycle detector is in cycle mode the port
// takes no packet from its neighbour and performs no circuit operation. On
// rot_start it forwards one packet to its successor port succ, out of turn and
// whether or not the neighbour is ready:
//  * the head of the DAMQ queue for succ, which is always mapped; else
//  * the unmapped packet in the Auxiliary Buffer, if it waits for succ: it is
//    moved onto this port's channel in succ's free channel bank, and the port
//    sends a CEP establishing that channel (unless the packet is a CEP), the
//    packet, and a CDP releasing it, and advances the node timestamp; else
//  * a dummy packet, which the successor discards.
// Rotated packets arriving from the predecessor go into a small rotation queue
// (the storage available even when the DAMQ buffer is full) and are then
// handled like any other arrival, after the port has rotated its own packet.
// A CEP on a free channel bank channel is mapped onto this port's bank channel
// of its output port without allocation, so rotated groups stay on bank
// channels until they are delivered.
//
// Interface summary: link input (in_valid, in_pkt, in_rot marks a rotated
// packet, in_ready); routing table lookup (rt_dest -> rt_port); virtual channel
// request to one output port (va_req, va_port -> va_gnt, va_vc); DAMQ heads
// for the switch's output arbiters (head, q_nonempty, deq_valid, deq_q, and
// sel_ok saying the switch may dequeue now); rotation output (rot_valid,
// rot_pkt, rot_port, rot_ack); status for deadlock detection (nonempty, moved,
// next_hop, rq_room). One packet is handled per cycle.
//
// The port-level choices here are this design's: packets are one word long,
// the Auxiliary Buffer doubles as the Alternate Auxiliary Buffer because
// control messages travel on their own wires, the rotation queue holds RQ
// packets, and a re-establishing CEP carries the current timestamp.
//
// The assertions read rst_n synchronously only to stay quiet during reset;
// linting reports that next to the asynchronous reset, and synthesis drops them.
module input_port
  import dvc_pkg::*;
#(
  parameter int unsigned MY_PORT = 1,
  parameter int unsigned CAP     = 8,
  parameter int unsigned RQ      = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NODE_W-1:0]  my_node,
  // link from the neighbour
  input  logic               in_valid,
  input  packet_t            in_pkt,
  input  logic               in_rot,
  output logic               in_ready,
  // routing table
  output logic [NODE_W-1:0]  rt_dest,
  input  logic [PORT_W-1:0]  rt_port,
  // virtual channel allocation
  output logic               va_req,
  output logic [PORT_W-1:0]  va_port,
  input  logic               va_gnt,
  input  logic [VC_W-1:0]    va_vc,
  // DAMQ heads towards the output arbiters
  output packet_t            head [NPORT],
  output logic [NPORT-1:0]   q_nonempty,
  output logic               sel_ok,
  input  logic               deq_valid,
  input  logic [PORT_W-1:0]  deq_q,
  // rotation
  input  logic               cycle_mode,
  input  logic               rot_start,
  input  logic [PORT_W-1:0]  succ,
  output logic               rot_valid,
  output packet_t            rot_pkt,
  output logic [PORT_W-1:0]  rot_port,
  input  logic               rot_ack,
  output logic               rot_arrived,
  input  logic [TS_W-1:0]    ts_in,
  output logic               ts_inc,
  // deadlock detection status
  output logic               nonempty,
  output logic               moved,
  output logic [PORT_W-1:0]  next_hop,
  output logic               rq_room,
  // event pulses for statistics
  output logic               ev_aux_wait,
  output logic               ev_reestablish,
  output logic               ev_unmapped_rot,
  output logic               ev_dummy_rot,
  output logic               ev_rq_overflow
);
  localparam int unsigned RW = $clog2(RQ);
  localparam logic [PORT_W-1:0] MYP = PORT_W'(MY_PORT);

  // ---------------------------------------------------------------- storage
  logic [$clog2(CAP+1)-1:0] free_cnt;
  logic                     dq_full;
  logic                     enq_valid;
  logic [PORT_W-1:0]        enq_q;
  packet_t                  enq_pkt;
  logic                     dq_deq;
  logic [PORT_W-1:0]        dq_deq_q;

  damq_buffer #(.CAP(CAP), .NQ(NPORT)) u_damq (
    .clk, .rst_n,
    .enq_valid, .enq_q, .enq_pkt,
    .deq_valid(dq_deq), .deq_q(dq_deq_q),
    .head, .q_nonempty, .free_cnt, .full(dq_full)
  );

  logic [VC_W-1:0] imt_rd_vc;
  imt_entry_t      imt_e;
  logic            imt_we;
  logic [VC_W-1:0] imt_wr_vc;
  imt_entry_t      imt_wr;

  input_mapping_table #(.N_VC(NVC)) u_imt (
    .clk, .rst_n,
    .rd_vc(imt_rd_vc), .rd_entry(imt_e),
    .we(imt_we), .wr_vc(imt_wr_vc), .wr_entry(imt_wr)
  );

  // Auxiliary Buffer
  logic              aux_valid;
  packet_t           aux_pkt;
  logic [PORT_W-1:0] aux_port;
  logic [NODE_W-1:0] aux_dest;   // destination of the held packet's circuit

  // rotation queue (arrivals of rotated packets)
  packet_t           rq_mem [RQ];
  logic [RW-1:0]     rq_rd, rq_wr;
  logic [RW:0]       rq_cnt;

  // rotation output sequence
  packet_t           rs_pkt [3];
  logic [1:0]        rs_len, rs_idx;
  logic              rotating;

  // ---------------------------------------------------------- arrival path
  logic busy;
  assign busy     = cycle_mode || rot_start || rotating;
  assign in_ready = !aux_valid && (rq_cnt == '0) && !busy && (free_cnt != '0);
  assign sel_ok   = !rotating && !rot_start;
  assign rq_room  = (32'(rq_cnt) + 3 <= RQ);

  typedef enum logic [1:0] { SRC_NONE, SRC_AUX, SRC_RQ, SRC_LINK } src_e;
  src_e    src;
  packet_t c;           // packet being handled this cycle
  always_comb begin
    src = SRC_NONE;
    c   = in_pkt;
    if (!busy) begin
      if (aux_valid)                       begin src = SRC_AUX;  c = aux_pkt;       end
      else if (rq_cnt != '0)               begin src = SRC_RQ;   c = rq_mem[rq_rd]; end
      else if (in_valid && !in_rot && in_ready) begin src = SRC_LINK; c = in_pkt;   end
    end
  end

  assign imt_rd_vc = c.vc;
  assign rt_dest   = (c.ptype == PK_CEP) ? c.dest : imt_e.dest;

  logic in_bank;
  assign in_bank = is_bank_vc(c.vc);

  // What the packet being handled needs.
  logic needs_alloc;      // waits for a virtual channel
  always_comb begin
    needs_alloc = 1'b0;
    unique case (c.ptype)
      PK_CEP:  needs_alloc = !in_bank;
      PK_DATA: needs_alloc = !imt_e.mapped && imt_e.dest_known && !in_bank;
      default: needs_alloc = 1'b0;
    endcase
  end

  // Outcome of handling.
  logic consume;          // packet leaves its source this cycle
  logic to_aux;           // packet moves into the Auxiliary Buffer
  always_comb begin
    consume   = 1'b0;
    to_aux    = 1'b0;
    enq_valid = 1'b0;
    enq_q     = '0;
    enq_pkt   = c;
    imt_we    = 1'b0;
    imt_wr_vc = c.vc;
    imt_wr    = imt_e;
    va_req    = 1'b0;
    va_port   = rt_port;
    ts_inc    = 1'b0;
    ev_reestablish = 1'b0;
    ev_unmapped_rot = 1'b0;
    if (src != SRC_NONE) begin
      if (needs_alloc && src != SRC_AUX) begin
        to_aux  = 1'b1;
        consume = 1'b1;
      end else if (needs_alloc) begin
        va_req  = (free_cnt != '0);
        if (va_gnt) begin
          imt_we             = 1'b1;
          imt_wr.mapped      = 1'b1;
          imt_wr.dest_known  = 1'b1;
          imt_wr.out_port    = aux_port;
          imt_wr.out_vc      = va_vc;
          imt_wr.dest        = rt_dest;
          enq_valid          = 1'b1;
          enq_q              = aux_port;
          if (c.ptype == PK_CEP) begin
            enq_pkt.vc = va_vc;
            consume    = 1'b1;
          end else begin
            // re-establish: a new CEP goes first, the packet follows next cycle
            enq_pkt.ptype   = PK_CEP;
            enq_pkt.vc      = va_vc;
            enq_pkt.dest    = imt_e.dest;
            enq_pkt.tear_id = my_node;
            enq_pkt.tstamp  = ts_in;
            enq_pkt.payload = '0;
            ev_reestablish  = 1'b1;
          end
        end
      end else if (free_cnt != '0) begin
        unique case (c.ptype)
          PK_DUMMY: consume = 1'b1;
          PK_CEP: begin     // on a free channel bank channel
            imt_we            = 1'b1;
            imt_wr.mapped     = 1'b1;
            imt_wr.dest_known = 1'b1;
            imt_wr.out_port   = rt_port;
            imt_wr.out_vc     = bank_vc(MYP);
            imt_wr.dest       = c.dest;
            enq_valid         = 1'b1;
            enq_q             = rt_port;
            enq_pkt.vc        = bank_vc(MYP);
            consume           = 1'b1;
          end
          PK_CDP: begin
            imt_we  = 1'b1;
            imt_wr  = '0;
            consume = 1'b1;
            if (imt_e.mapped) begin
              enq_valid  = 1'b1;
              enq_q      = imt_e.out_port;
              enq_pkt.vc = imt_e.out_vc;
            end
          end
          default: begin    // PK_DATA
            consume = 1'b1;
            if (imt_e.mapped) begin
              enq_valid  = 1'b1;
              enq_q      = imt_e.out_port;
              enq_pkt.vc = imt_e.out_vc;
            end
          end
        endcase
      end
    end

    // Rotation of an unmapped packet takes the table write port; arrivals are
    // not handled while rotating, so the two never meet.
    if (rot_start && !q_nonempty[succ] && aux_valid && aux_port == succ) begin
      ts_inc          = 1'b1;
      ev_unmapped_rot = 1'b1;
      if (aux_pkt.ptype == PK_CEP) begin
        imt_we            = 1'b1;
        imt_wr_vc         = aux_pkt.vc;
        imt_wr            = '0;
        imt_wr.dest_known = 1'b1;
        imt_wr.dest       = aux_pkt.dest;
      end
    end
  end

  // DAMQ dequeue: the switch's choice, or the rotation.
  logic rot_from_damq;
  assign rot_from_damq = rot_start && q_nonempty[succ];
  assign dq_deq   = rot_from_damq || (deq_valid && sel_ok);
  assign dq_deq_q = rot_from_damq ? succ : deq_q;

  assign rot_arrived = in_valid && in_rot;

  // Rotation sequence built on rot_start.
  packet_t rb_cep, rb_pkt, rb_cdp;
  always_comb begin
    rb_pkt         = aux_pkt;
    rb_pkt.vc      = bank_vc(MYP);
    rb_cep         = '0;
    rb_cep.ptype   = PK_CEP;
    rb_cep.vc      = bank_vc(MYP);
    rb_cep.dest    = (aux_pkt.ptype == PK_CEP) ? aux_pkt.dest : aux_dest;
    rb_cep.tear_id = my_node;
    rb_cep.tstamp  = ts_in;
    rb_cdp         = rb_cep;
    rb_cdp.ptype   = PK_CDP;
    rb_cdp.dest    = '0;
  end


  logic rq_push, rq_pop;
  assign rq_push = in_valid && in_rot && (32'(rq_cnt) < RQ);
  assign rq_pop  = (src == SRC_RQ) && consume;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aux_valid <= 1'b0;
      aux_pkt   <= '0;
      aux_port  <= '0;
      aux_dest  <= '0;
      rq_rd     <= '0;
      rq_wr     <= '0;
      rq_cnt    <= '0;
      for (int i = 0; i < RQ; i++) rq_mem[i] <= '0;
      for (int i = 0; i < 3; i++)  rs_pkt[i] <= '0;
      rs_len    <= '0;
      rs_idx    <= '0;
      rotating  <= 1'b0;
      rot_port  <= '0;
      ev_dummy_rot   <= 1'b0;
      ev_rq_overflow <= 1'b0;
    end else begin
      ev_dummy_rot   <= 1'b0;
      ev_rq_overflow <= 1'b0;

      // rotation queue
      begin
        if (in_valid && in_rot && !(32'(rq_cnt) < RQ)) ev_rq_overflow <= 1'b1;
        if (rq_push) begin
          rq_mem[rq_wr] <= in_pkt;
          rq_wr         <= rq_wr + RW'(1);
        end
        if (rq_pop) rq_rd <= rq_rd + RW'(1);
        rq_cnt <= rq_cnt + (RW+1)'(rq_push) - (RW+1)'(rq_pop);
      end

      // Auxiliary Buffer
      if (to_aux) begin
        aux_valid <= 1'b1;
        aux_pkt   <= c;
        aux_port  <= rt_port;
        aux_dest  <= rt_dest;
      end else if (src == SRC_AUX && consume) begin
        aux_valid <= 1'b0;
      end

      // rotation output
      if (rot_start) begin
        rot_port <= succ;
        rotating <= 1'b1;
        rs_idx   <= '0;
        if (q_nonempty[succ]) begin
          rs_pkt[0] <= head[succ];
          rs_len    <= 2'd1;
        end else if (aux_valid && aux_port == succ) begin
          aux_valid <= 1'b0;
          if (aux_pkt.ptype == PK_CEP) begin
            rs_pkt[0] <= rb_pkt;
            rs_pkt[1] <= rb_cdp;
            rs_len    <= 2'd2;
          end else begin
            rs_pkt[0] <= rb_cep;
            rs_pkt[1] <= rb_pkt;
            rs_pkt[2] <= rb_cdp;
            rs_len    <= 2'd3;
          end
        end else begin
          rs_pkt[0]       <= '0;
          rs_pkt[0].ptype <= PK_DUMMY;
          rs_len          <= 2'd1;
          ev_dummy_rot    <= 1'b1;
        end
      end else if (rotating && rot_ack) begin
        if (rs_idx + 2'd1 == rs_len) rotating <= 1'b0;
        rs_idx <= rs_idx + 2'd1;
      end
    end
  end

  assign rot_valid = rotating;
  assign rot_pkt   = rs_pkt[rs_idx];

  // ---------------------------------------------------------- status
  assign nonempty    = (q_nonempty != '0) || aux_valid;
  assign moved       = dq_deq || (rot_start && aux_valid && aux_port == succ);
  assign ev_aux_wait = to_aux;

  // The packet that keeps the port from receiving is the one in the
  // Auxiliary Buffer, if any; otherwise the head of the first non-empty queue
  // towards a neighbour.
  always_comb begin
    next_hop = P_LOCAL;
    for (int q = NPORT-1; q >= 1; q--)
      if (q_nonempty[q]) next_hop = PORT_W'(q);
    if (aux_valid && aux_port != P_LOCAL) next_hop = aux_port;
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(in_valid && in_rot && !(32'(rq_cnt) < RQ))) else $error("input_port: rotation queue overflow");
      assert (!(enq_valid && dq_full)) else $error("input_port: DAMQ overflow");
    end
  end
endmodule
