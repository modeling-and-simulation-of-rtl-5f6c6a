// tb_test_collar: random traffic on both sides; the memory side must carry the
// BIST request when bist_on is high and the system request otherwise, and the
// memory's read data must reach both sides.
module tb_test_collar;
  localparam int unsigned AW = 4, DW = 16;
  logic          bist_on;
  logic          sys_en, sys_we, bist_en, bist_we, mem_en, mem_we;
  logic [AW-1:0] sys_addr, bist_addr, mem_addr;
  logic [DW-1:0] sys_wdata, bist_wdata, mem_wdata, mem_rdata, sys_rdata, bist_rdata;
  int            checks = 0, failures = 0;

  test_collar dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      bist_on    = $urandom_range(0, 1) == 1;
      sys_en     = $urandom_range(0, 1) == 1;  sys_we  = $urandom_range(0, 1) == 1;
      bist_en    = $urandom_range(0, 1) == 1;  bist_we = $urandom_range(0, 1) == 1;
      sys_addr   = AW'($urandom);  bist_addr  = AW'($urandom);
      sys_wdata  = DW'($urandom);  bist_wdata = DW'($urandom);
      mem_rdata  = DW'($urandom);
      #1;
      checks++;
      if (bist_on ? {mem_en, mem_we, mem_addr, mem_wdata} != {bist_en, bist_we, bist_addr, bist_wdata}
                  : {mem_en, mem_we, mem_addr, mem_wdata} != {sys_en, sys_we, sys_addr, sys_wdata}) begin
        failures++;
        $display("FAIL i=%0d bist_on=%0b wrong request routed", i, bist_on);
      end
      checks++;
      if (sys_rdata != mem_rdata || bist_rdata != mem_rdata) begin
        failures++;
        $display("FAIL i=%0d read data not routed", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
