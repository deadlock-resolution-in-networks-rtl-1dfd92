// tb_damq_buffer: random enqueues and dequeues on the DAMQ buffer, compared
// with one reference FIFO per queue. Checks every queue head, the non-empty
// flags and the free-slot count each cycle, that a full buffer lets a packet
// for another queue pass a blocked queue, and that an empty queue's packet is
// at the head one cycle after it is enqueued.
module tb_damq_buffer;
  import dvc_pkg::*;
  localparam int CAP = 8, NQ = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enq_valid, deq_valid, full;
  logic [2:0] enq_q, deq_q;
  packet_t enq_pkt, head [NQ];
  logic [NQ-1:0] q_nonempty;
  logic [3:0] free_cnt;
  damq_buffer #(.CAP(CAP), .NQ(NQ)) dut (.*);

  int checks = 0, failures = 0;
  packet_t ref_q [NQ][$];
  int total;

  task automatic check_state();
    total = 0;
    for (int q = 0; q < NQ; q++) begin
      total += ref_q[q].size();
      checks++;
      if (q_nonempty[q] != (ref_q[q].size() != 0)) begin failures++; $display("FAIL nonempty q%0d", q); end
      else if (ref_q[q].size() != 0 && head[q] != ref_q[q][0]) begin failures++; $display("FAIL head q%0d", q); end
    end
    checks++;
    if (int'(free_cnt) != CAP - total) begin failures++; $display("FAIL free_cnt %0d vs %0d", free_cnt, CAP - total); end
  endtask

  initial begin
    enq_valid = 0; deq_valid = 0; enq_q = 0; deq_q = 0; enq_pkt = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_state();
    // timing: enqueue in cycle t, head visible in t+1
    enq_valid = 1; enq_q = 2; enq_pkt = '0; enq_pkt.payload = 16'hBEEF;
    @(posedge clk); #1; enq_valid = 0; ref_q[2].push_back(enq_pkt);
    checks++;
    if (!(q_nonempty[2] && head[2].payload == 16'hBEEF)) begin failures++; $display("FAIL latency"); end
    // fill queue 3 until full, then one leaves from queue 2 and queue 3 still blocked
    for (int i = 0; i < CAP - 1; i++) begin
      @(negedge clk); enq_valid = 1; enq_q = 3; enq_pkt.payload = 16'(i); enq_pkt.vc = 4'(i);
      @(posedge clk); ref_q[3].push_back(enq_pkt);
    end
    @(negedge clk); enq_valid = 0;
    checks++; if (!full) begin failures++; $display("FAIL not full"); end
    check_state();
    // queue 2's packet leaves although queue 3 cannot (no head-of-line blocking)
    deq_valid = 1; deq_q = 2;
    @(posedge clk); void'(ref_q[2].pop_front());
    @(negedge clk); deq_valid = 0;
    check_state();
    // random traffic
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      total = 0;
      for (int q = 0; q < NQ; q++) total += ref_q[q].size();
      enq_valid = ($urandom_range(1) == 1) && total < CAP;
      enq_q     = 3'($urandom_range(NQ - 1));
      enq_pkt   = packet_t'({$urandom, $urandom});
      deq_q     = 3'($urandom_range(NQ - 1));
      deq_valid = ($urandom_range(2) != 0) && ref_q[deq_q].size() != 0;
      @(posedge clk);
      if (deq_valid) void'(ref_q[deq_q].pop_front());
      if (enq_valid) ref_q[enq_q].push_back(enq_pkt);
      #1;
      check_state();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
