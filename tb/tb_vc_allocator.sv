// tb_vc_allocator: all inputs request channels until the output's normal
// channels are exhausted. Checks that every grant is one-hot, goes to a
// requester, hands out a channel not already in use and never one of the
// free channel bank, that exactly N_VC - N_BANK channels are handed out, that
// grants rotate among the requesters, and that a released channel is granted
// again in the next cycle.
module tb_vc_allocator;
  import dvc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NPORT-1:0] req, gnt;
  logic [3:0] gnt_vc, rel_vc;
  logic rel_valid;
  vc_allocator dut (.*);
  int checks = 0, failures = 0;
  bit inuse [NVC];
  int ngrant = 0;
  int per_in [NPORT];
  initial begin
    req = '0; rel_valid = 0; rel_vc = 0;
    for (int i = 0; i < NPORT; i++) per_in[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    req = '1;
    for (int c = 0; c < 20; c++) begin
      #1;
      if (gnt != '0) begin
        checks++;
        if (!$onehot(gnt) || (gnt & ~req) != '0 || inuse[gnt_vc] || is_bank_vc(gnt_vc)) begin
          failures++; $display("FAIL grant %b vc %0d", gnt, gnt_vc);
        end
        inuse[gnt_vc] = 1;
        ngrant++;
        for (int i = 0; i < NPORT; i++) if (gnt[i]) per_in[i]++;
      end
      @(negedge clk);
    end
    checks++;
    if (ngrant != NVC - NPORT) begin failures++; $display("FAIL %0d grants", ngrant); end
    // round robin: 11 grants over 5 requesters give each 2 or 3
    for (int i = 0; i < NPORT; i++) begin
      checks++; if (per_in[i] < 2 || per_in[i] > 3) begin failures++; $display("FAIL fairness in%0d %0d", i, per_in[i]); end
    end
    // exhausted: no grant
    #1; checks++; if (gnt != '0) begin failures++; $display("FAIL grant while exhausted"); end
    // release channel 7; granted next cycle; a bank channel release is ignored
    rel_valid = 1; rel_vc = 7;
    @(negedge clk); rel_valid = 0; #1;
    checks++; if (gnt == '0 || gnt_vc != 7) begin failures++; $display("FAIL regrant %b %0d", gnt, gnt_vc); end
    @(negedge clk);
    rel_valid = 1; rel_vc = 4'(NVC - 1);
    @(negedge clk); rel_valid = 0; #1;
    checks++; if (gnt != '0) begin failures++; $display("FAIL bank channel granted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
