// tb_addr_comparator: exhaustive check of the end-of-range comparator.
module tb_addr_comparator;
  localparam int unsigned AW = 4;
  logic [AW-1:0] addr, last_addr;
  logic          max_addr;
  int            checks = 0, failures = 0;

  addr_comparator dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++)
      for (int l = 0; l < 16; l++) begin
        addr = AW'(a); last_addr = AW'(l);
        #1;
        checks++;
        if (max_addr != (a == l)) begin
          failures++;
          $display("FAIL addr=%0d last=%0d max_addr=%0b", a, l, max_addr);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
