// tb_input_mapping_table: random writes to the Input Mapping Table against a
// reference array; every read is checked, including that reset leaves every
// channel unmapped and that a write shows on the read port one cycle later.
module tb_input_mapping_table;
  import dvc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0] rd_vc, wr_vc;
  imt_entry_t rd_entry, wr_entry;
  logic we;
  input_mapping_table dut (.*);
  imt_entry_t ref_t [NVC];
  int checks = 0, failures = 0;
  initial begin
    we = 0; rd_vc = 0; wr_vc = 0; wr_entry = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int v = 0; v < NVC; v++) begin
      ref_t[v] = '0;
      rd_vc = 4'(v); #1;
      checks++; if (rd_entry != '0) begin failures++; $display("FAIL reset v%0d", v); end
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = $urandom_range(1) == 1;
      wr_vc = 4'($urandom_range(NVC - 1));
      wr_entry = imt_entry_t'($urandom);
      rd_vc = 4'($urandom_range(NVC - 1));
      #1;
      checks++; if (rd_entry != ref_t[rd_vc]) begin failures++; $display("FAIL read v%0d", rd_vc); end
      @(posedge clk);
      if (we) ref_t[wr_vc] = wr_entry;
      #1; rd_vc = wr_vc; #1;
      checks++; if (rd_entry != ref_t[rd_vc]) begin failures++; $display("FAIL after write v%0d", rd_vc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
