// tb_route_table: the reset contents of the routing table of node 14 (row 2,
// column 2) in a 6 x 6 mesh are checked against row-first routing worked out
// here, then one entry is rewritten to column-first and read back on every
// read port.
module tb_route_table;
  import dvc_pkg::*;
  localparam int ROWS = 6, COLS = 6, ME = 14;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NODE_W-1:0] rd_dest [NPORT];
  logic [PORT_W-1:0] rd_port [NPORT];
  logic we;
  logic [NODE_W-1:0] wr_dest;
  logic [PORT_W-1:0] wr_port;
  route_table #(.ROWS(ROWS), .COLS(COLS), .MY_ID(ME)) dut (.*);
  int checks = 0, failures = 0;
  function automatic logic [PORT_W-1:0] expect_rf(int d);
    int r, c;
    r = d / COLS; c = d % COLS;
    if (c > ME % COLS) return P_EAST;
    if (c < ME % COLS) return P_WEST;
    if (r > ME / COLS) return P_SOUTH;
    if (r < ME / COLS) return P_NORTH;
    return P_LOCAL;
  endfunction
  initial begin
    we = 0; wr_dest = 0; wr_port = 0;
    for (int i = 0; i < NPORT; i++) rd_dest[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int d = 0; d < ROWS * COLS; d++) begin
      for (int i = 0; i < NPORT; i++) rd_dest[i] = NODE_W'(d);
      #1;
      for (int i = 0; i < NPORT; i++) begin
        checks++;
        if (rd_port[i] != expect_rf(d)) begin failures++; $display("FAIL d%0d port%0d: %0d", d, i, rd_port[i]); end
      end
    end
    // destination 34 (row 5, col 4): row-first says east, column-first south
    @(negedge clk); we = 1; wr_dest = 34; wr_port = P_SOUTH;
    @(negedge clk); we = 0;
    for (int i = 0; i < NPORT; i++) rd_dest[i] = 34;
    #1;
    for (int i = 0; i < NPORT; i++) begin
      checks++; if (rd_port[i] != P_SOUTH) begin failures++; $display("FAIL rewrite"); end
    end
    rd_dest[0] = 35; #1;
    checks++; if (rd_port[0] != P_EAST) begin failures++; $display("FAIL neighbour entry changed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
