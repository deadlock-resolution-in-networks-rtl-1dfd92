// route_table: routing table of one switch, mapping a destination node to the
// output port a new circuit should take.
//
// Circuits are routed by table lookup, so any topology and any routing policy
// can be loaded. At reset the table is filled with row-first routing for a
// ROWS x COLS mesh: a circuit first moves east or west along its row until it
// reaches the destination's column, then north or south, and finally leaves on
// the local port. Software (or a testbench) may overwrite single entries through
// the write port, for example to route some destinations column-first.
//
// Interface: NRD asynchronous read ports (one per input port, rd_dest ->
// rd_port) and one synchronous write port (we, wr_dest, wr_port). Node ids are
// row*COLS + col; row 0 is the north edge, column 0 the west edge.
module route_table
  import dvc_pkg::*;
#(
  parameter int unsigned ROWS  = 6,
  parameter int unsigned COLS  = 6,
  parameter int unsigned MY_ID = 0,
  parameter int unsigned NRD   = NPORT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NODE_W-1:0]    rd_dest [NRD],
  output logic [PORT_W-1:0]    rd_port [NRD],
  input  logic                 we,
  input  logic [NODE_W-1:0]    wr_dest,
  input  logic [PORT_W-1:0]    wr_port
);
  localparam int unsigned NN = ROWS * COLS;
  localparam int unsigned MY_ROW = MY_ID / COLS;
  localparam int unsigned MY_COL = MY_ID % COLS;

  logic [PORT_W-1:0] tbl [NN];

  function automatic logic [PORT_W-1:0] row_first(input int unsigned d);
    int dr, dc;
    dr = int'(d / COLS);
    dc = int'(d % COLS);
    if (dc > int'(MY_COL))      return P_EAST;
    else if (dc < int'(MY_COL)) return P_WEST;
    else if (dr > int'(MY_ROW)) return P_SOUTH;
    else if (dr < int'(MY_ROW)) return P_NORTH;
    else                  return P_LOCAL;
  endfunction

  for (genvar r = 0; r < NRD; r++) begin : g_rd
    assign rd_port[r] = (32'(rd_dest[r]) < NN) ? tbl[rd_dest[r]] : P_LOCAL;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < NN; d++) tbl[d] <= row_first(d);
    end else if (we && 32'(wr_dest) < NN) begin
      tbl[wr_dest] <= wr_port;
    end
  end
endmodule
