// tb_data_gen: for every operation encoding and both operation indices the
// data word must be the selected operation's value replicated over 16 bits.
module tb_data_gen;
  import mbist_pkg::*;
  localparam int unsigned DW = 16;
  march_elem_t   elem;
  logic          op_idx;
  logic [DW-1:0] data;
  int            checks = 0, failures = 0;

  data_gen dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 64; e++)
      for (int k = 0; k < 2; k++) begin
        elem   = march_elem_t'(e[5:0]);
        op_idx = k[0];
        #1;
        checks++;
        // op0.val is bit 0, op1.val is bit 2 of the packed element
        if (data != (((k == 0) ? e[0] : e[2]) ? 16'hFFFF : 16'h0000)) begin
          failures++;
          $display("FAIL elem=%b op_idx=%0d data=%h", e[5:0], k, data);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
