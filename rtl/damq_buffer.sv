// damq_buffer: Dynamically Allocated Multi-Queue buffer of one switch input
// port.
//
// The buffer holds CAP packets in one shared pool of slots. Each output port of
// the switch has its own queue, kept as a linked list through the pool, so a
// packet waiting for a busy output never blocks a packet behind it that wants
// another output (no head-of-line blocking). That property is what lets a CDP
// created to tear down a victim circuit leave without waiting behind packets
// for other outputs. Queues take slots from the pool on demand, so one queue
// may use all CAP slots.
//
// Interface: one enqueue per cycle (enq_valid, enq_q selects the queue), and one
// dequeue per cycle (deq_valid, deq_q). The head packet of every queue is shown
// combinationally on head[q]; q_nonempty[q] says whether it is valid. An
// enqueue and a dequeue may happen in the same cycle, also on the same queue.
// free_cnt counts unused slots. Enqueueing into a full buffer or dequeueing an
// empty queue is an error the assertions catch; the enqueue is ignored.
//
// Timing: a packet enqueued in cycle t is at the head of an empty queue in
// cycle t+1. Reset empties all queues.
//
// The multi-queue organisation follows the buffer the design calls for; the
// free-slot bitmap with a priority encoder and the linked-list pointers are
// this implementation's choice.
//
// The assertions read rst_n synchronously only to stay quiet during reset;
// linting reports that next to the asynchronous reset, and synthesis drops them.
module damq_buffer
  import dvc_pkg::*;
#(
  parameter int unsigned CAP = 8,
  parameter int unsigned NQ  = NPORT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enq_valid,
  input  logic [$clog2(NQ)-1:0]   enq_q,
  input  packet_t                 enq_pkt,
  input  logic                    deq_valid,
  input  logic [$clog2(NQ)-1:0]   deq_q,
  output packet_t                 head [NQ],
  output logic [NQ-1:0]           q_nonempty,
  output logic [$clog2(CAP+1)-1:0] free_cnt,
  output logic                    full
);
  localparam int unsigned SW = $clog2(CAP);
  localparam int unsigned CW = $clog2(CAP+1);

  packet_t         mem   [CAP];
  logic [SW-1:0]   nxt   [CAP];
  logic [SW-1:0]   hd    [NQ];
  logic [SW-1:0]   tl    [NQ];
  logic [CW-1:0]   cnt   [NQ];
  logic [CAP-1:0]  used;

  logic [SW-1:0]   new_slot;
  logic            do_enq, do_deq;

  always_comb begin
    new_slot = '0;
    for (int i = CAP-1; i >= 0; i--)
      if (!used[i]) new_slot = SW'(i);
  end

  assign full     = &used;
  assign do_enq   = enq_valid && !full;
  assign do_deq   = deq_valid && (cnt[deq_q] != '0);

  always_comb begin
    free_cnt = CW'(CAP);
    for (int i = 0; i < CAP; i++)
      free_cnt -= CW'(used[i]);
  end

  for (genvar q = 0; q < NQ; q++) begin : g_head
    assign head[q]       = mem[hd[q]];
    assign q_nonempty[q] = (cnt[q] != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used <= '0;
      for (int q = 0; q < NQ; q++) begin
        hd[q]  <= '0;
        tl[q]  <= '0;
        cnt[q] <= '0;
      end
      for (int i = 0; i < CAP; i++) begin
        nxt[i] <= '0;
        mem[i] <= '0;
      end
    end else begin
      if (do_deq) begin
        used[hd[deq_q]] <= 1'b0;
        hd[deq_q]       <= nxt[hd[deq_q]];
      end
      if (do_enq) begin
        mem[new_slot]  <= enq_pkt;
        used[new_slot] <= 1'b1;
        tl[enq_q]      <= new_slot;
        // An empty queue, or one whose only packet leaves now, gets a new head.
        if (cnt[enq_q] == '0 ||
            (do_deq && deq_q == enq_q && cnt[enq_q] == CW'(1)))
          hd[enq_q] <= new_slot;
        else
          nxt[tl[enq_q]] <= new_slot;
      end
      for (int q = 0; q < NQ; q++) begin
        cnt[q] <= cnt[q] + CW'(do_enq && 32'(enq_q) == q) - CW'(do_deq && 32'(deq_q) == q);
      end
    end
  end

  // Handshake rules: never enqueue into a full buffer, never dequeue an empty
  // queue.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(enq_valid && full)) else $error("damq_buffer: enqueue while full");
      assert (!(deq_valid && cnt[deq_q] == '0)) else $error("damq_buffer: dequeue of empty queue");
    end
  end
endmodule
