// vc_allocator: virtual channel allocator of one switch output port.
//
// The link leaving the output port carries N_VC virtual channels. The top
// N_BANK of them form the free channel bank: input port p always owns bank
// channel N_VC-N_BANK+p and uses it only for packets that were unmapped during
// a deadlock cycle rotation, so those channels are never handed out here. The
// remaining channels are allocated to circuits being established (a CEP passing
// or a cut circuit being re-established) and released when the circuit's CDP
// leaves through this output port.
//
// Interface: each input port raises req[i] while it waits for a channel. In a
// cycle with a free channel one request is granted (gnt one-hot, gnt_vc the
// lowest free channel); the grant takes effect at the clock edge. Requests are
// served round robin, starting after the last granted port. rel_valid/rel_vc
// return a channel; a channel released in cycle t can be granted in t+1.
// Releasing a bank channel or a channel that is not allocated is ignored.
//
// Round-robin order and lowest-channel-first are this design's choices.
//
// The assertions read rst_n synchronously only to stay quiet during reset;
// linting reports that next to the asynchronous reset, and synthesis drops them.
module vc_allocator
  import dvc_pkg::*;
#(
  parameter int unsigned N_VC   = NVC,
  parameter int unsigned N_BANK = NPORT,
  parameter int unsigned NREQ   = NPORT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NREQ-1:0]         req,
  output logic [NREQ-1:0]         gnt,
  output logic [$clog2(N_VC)-1:0] gnt_vc,
  input  logic                    rel_valid,
  input  logic [$clog2(N_VC)-1:0] rel_vc
);
  localparam int unsigned NNORM = N_VC - N_BANK;
  localparam int unsigned VW    = $clog2(N_VC);
  localparam int unsigned RW    = $clog2(NREQ);

  logic [NNORM-1:0] busy;
  logic             any_free;
  logic [RW-1:0]    last;

  always_comb begin
    any_free = 1'b0;
    gnt_vc   = '0;
    for (int v = NNORM-1; v >= 0; v--)
      if (!busy[v]) begin
        any_free = 1'b1;
        gnt_vc   = VW'(v);
      end
  end

  // Round-robin choice of one requester.
  int unsigned idx;
  always_comb begin
    idx = 0;
    gnt = '0;
    if (any_free) begin
      for (int k = NREQ; k >= 1; k--) begin
        idx = (32'(last) + 32'(k)) % NREQ;
        if (req[idx]) gnt = NREQ'(1) << idx;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= '0;
      last <= RW'(NREQ - 1);
    end else begin
      if (rel_valid && 32'(rel_vc) < NNORM) busy[rel_vc] <= 1'b0;
      if (gnt != '0) begin
        busy[gnt_vc] <= 1'b1;
        for (int i = 0; i < NREQ; i++)
          if (gnt[i]) last <= RW'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) assert ($onehot0(gnt)) else $error("vc_allocator: more than one grant");
  end
endmodule
