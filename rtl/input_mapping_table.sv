// input_mapping_table: the Input Mapping Table of one switch input port.
//
// For every virtual channel of the incoming link it records the output port and
// the output virtual channel of the circuit that uses it, written when the
// circuit's CEP passes and cleared when its CDP passes. A data packet arriving
// on an established circuit needs only this one lookup to find its output port
// and the channel number to put in its header. The entry also keeps the
// circuit's ultimate destination after the circuit has been cut at this
// switch, so the switch can re-establish it when the next packet arrives.
//
// Interface: an asynchronous read port (rd_vc -> rd_entry) and one synchronous
// write port (we, wr_vc, wr_entry). A write is visible on the read port in the
// next cycle. Reset clears every entry (no circuits).
module input_mapping_table
  import dvc_pkg::*;
#(
  parameter int unsigned N_VC = NVC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [$clog2(N_VC)-1:0] rd_vc,
  output imt_entry_t              rd_entry,
  input  logic                    we,
  input  logic [$clog2(N_VC)-1:0] wr_vc,
  input  imt_entry_t              wr_entry
);
  imt_entry_t tbl [N_VC];

  assign rd_entry = tbl[rd_vc];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_VC; i++) tbl[i] <= '0;
    end else if (we) begin
      tbl[wr_vc] <= wr_entry;
    end
  end
endmodule
