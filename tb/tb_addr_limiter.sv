// tb_addr_limiter: exhaustive check of the address limiter for a 4-bit range:
// every (lim_lo, lim_hi, down) gives the expected start and stop address.
module tb_addr_limiter;
  localparam int unsigned AW = 4;
  logic [AW-1:0] lim_lo, lim_hi, first_addr, last_addr;
  logic          down;
  int            checks = 0, failures = 0;

  addr_limiter dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int lo = 0; lo < 16; lo++)
      for (int hi = lo; hi < 16; hi++)
        for (int d = 0; d < 2; d++) begin
          lim_lo = AW'(lo); lim_hi = AW'(hi); down = d[0];
          #1;
          checks++;
          if (first_addr != AW'(d ? hi : lo) || last_addr != AW'(d ? lo : hi)) begin
            failures++;
            $display("FAIL lo=%0d hi=%0d down=%0d first=%0d last=%0d", lo, hi, d, first_addr, last_addr);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
