// tb_blocked_detector: with a 20-cycle period, buffer 2 holds a packet that
// never moves, buffer 1 holds packets that move every few cycles and buffer 3
// is empty. Checks that only buffer 2 is declared, exactly TIMEOUT cycles after
// its status bit was set and once per period, that a moving buffer's status
// bit is cleared, and that with two blocked buffers the declaration alternates
// between them. A disabled buffer is never declared.
module tb_blocked_detector;
  localparam int NB = 5, TO = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NB-1:0] nonempty, moved, check_en, status;
  logic blocked_valid;
  logic [2:0] blocked_idx;
  blocked_detector #(.NBUF(NB), .TIMEOUT(TO)) dut (.*);
  int checks = 0, failures = 0;
  int cyc = 0, last_set = -1, decl = 0;
  int seen [NB];
  int run1 = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && dut.setting) last_set <= cyc;
  always @(posedge clk) begin
    if (rst_n && blocked_valid) begin
      decl++;
      seen[blocked_idx]++;
      checks++;
      if (cyc - last_set != TO) begin failures++; $display("FAIL latency %0d", cyc - last_set); end
    end
  end
  initial begin
    nonempty = '0; moved = '0; check_en = 5'b11110;
    for (int i = 0; i < NB; i++) seen[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    nonempty = 5'b00111;       // buffer 0 is disabled, 1 moves, 2 is stuck
    for (int c = 0; c < 10 * (TO + 1); c++) begin
      @(negedge clk);
      moved = (c % 5 == 0) ? 5'b00010 : 5'b00000;
      // a buffer that moves every 5 cycles never keeps its bit longer
      run1 = status[1] ? run1 + 1 : 0;
      checks++;
      if (run1 > 5) begin failures++; $display("FAIL status of moving buffer"); end
    end
    checks++; if (seen[2] < 9 || seen[1] != 0 || seen[0] != 0 || seen[3] != 0) begin
      failures++; $display("FAIL declarations %0d %0d %0d %0d", seen[0], seen[1], seen[2], seen[3]);
    end
    // two stuck buffers: both get declared in turn
    for (int i = 0; i < NB; i++) seen[i] = 0;
    moved = '0;
    nonempty = 5'b10100;
    repeat (6 * (TO + 1)) @(negedge clk);
    checks++; if (seen[2] < 2 || seen[4] < 2) begin failures++; $display("FAIL alternation %0d %0d", seen[2], seen[4]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
