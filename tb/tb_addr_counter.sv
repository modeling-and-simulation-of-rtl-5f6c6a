// tb_addr_counter: random load / step / direction sequence against an integer
// model of an up/down counter modulo 16; checks load priority and wrapping.
module tb_addr_counter;
  localparam int unsigned AW = 4;
  logic          clk = 1'b0, rst_n = 1'b0;
  logic          load, step, down;
  logic [AW-1:0] load_addr, addr;
  int            model = 0;
  int            checks = 0, failures = 0;

  addr_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 1'b0; step = 1'b0; down = 1'b0; load_addr = '0;
    repeat (2) @(posedge clk);
    checks++;
    if (addr != '0) begin failures++; $display("FAIL reset addr=%0d", addr); end
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      load      = ($urandom_range(0, 9) == 0);
      step      = $urandom_range(0, 1) == 1;
      down      = $urandom_range(0, 1) == 1;
      load_addr = AW'($urandom);
      if (load)      model = int'(load_addr);
      else if (step) model = down ? (model + 15) % 16 : (model + 1) % 16;
      @(posedge clk); #1;
      checks++;
      if (int'(addr) != model) begin
        failures++;
        $display("FAIL i=%0d addr=%0d expected=%0d", i, addr, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
