// blocked_detector: periodic identification of blocked input buffers in one
// switch, the first step of deadlock detection.
//
// Every buffer has a status bit. At the start of a checking period the switch
// sets the status bit of each buffer that holds a packet. During the waiting
// period that follows, any packet leaving a buffer clears that buffer's bit.
// When the waiting period ends, bits still set belong to buffers whose packets
// could not move during the whole period; the first of them found is declared
// Blocked with a one-cycle pulse on blocked_valid and its index on
// blocked_idx. A new period then starts. At most one buffer is declared per
// period. The search for the first set bit starts after the buffer declared
// last, so that every blocked buffer gets its turn.
//
// Interface: nonempty[i] and moved[i] describe buffer i in the current cycle;
// check_en[i] masks buffers that may not start a search (for example the port
// fed by the local host). status[i] is the live status bit, used by the cycle
// search to tell whether a buffer is still blocked.
//
// Timing: a period is 1 set cycle plus TIMEOUT waiting cycles; a buffer whose
// bit was set at the end of the set cycle is declared in the last waiting
// cycle, TIMEOUT cycles later. The default
// TIMEOUT of 400 clocks is near the recovery-time minimum of the timeout sweep
// the design was evaluated with; the sweep itself covered 50 to 1500 clocks.
//
// Lint note: the loop index idx is a full integer of which only the low bits
// are used as a buffer number.
module blocked_detector #(
  parameter int unsigned NBUF    = 5,
  parameter int unsigned TIMEOUT = 400
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NBUF-1:0]          nonempty,
  input  logic [NBUF-1:0]          moved,
  input  logic [NBUF-1:0]          check_en,
  output logic [NBUF-1:0]          status,
  output logic                     blocked_valid,
  output logic [$clog2(NBUF)-1:0]  blocked_idx
);
  localparam int unsigned TW = $clog2(TIMEOUT + 1);

  logic [TW-1:0]   timer;
  logic            setting;
  logic [NBUF-1:0] cand;

  assign cand = status & check_en & ~moved;

  logic [$clog2(NBUF)-1:0] last;
  int unsigned             idx;
  always_comb begin
    blocked_idx = '0;
    idx         = 0;
    for (int k = NBUF; k >= 1; k--) begin
      idx = (32'(last) + 32'(k)) % NBUF;
      if (cand[idx]) blocked_idx = ($clog2(NBUF))'(idx);
    end
  end

  assign blocked_valid = !setting && (timer == '0) && (cand != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      status  <= '0;
      timer   <= '0;
      setting <= 1'b1;
      last    <= ($clog2(NBUF))'(NBUF - 1);
    end else if (setting) begin
      status  <= nonempty & ~moved;
      timer   <= TW'(TIMEOUT - 1);
      setting <= 1'b0;
    end else begin
      status <= status & ~moved;
      if (blocked_valid) last <= blocked_idx;
      if (timer == '0) setting <= 1'b1;
      else             timer   <= timer - TW'(1);
    end
  end
endmodule
