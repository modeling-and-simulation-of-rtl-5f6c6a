// tb_sram: random writes and reads against an array model, first fault free,
// then with two stuck-at faults (word 3 bit 0 stuck at 0, word 10 bit 15 stuck
// at 1). Checks the one-cycle read latency and that rdata holds when idle.
module tb_sram;
  localparam int unsigned AW = 4, DW = 16, NF = 2;
  logic                  clk = 1'b0;
  logic                  en, we;
  logic [AW-1:0]         addr;
  logic [DW-1:0]         wdata, rdata;
  logic [NF-1:0]         flt_en;
  logic [NF-1:0][AW-1:0] flt_addr;
  logic [NF-1:0][3:0]    flt_bit;
  logic [NF-1:0]         flt_val;
  logic [DW-1:0]         model [16];
  logic [DW-1:0]         expect_q;
  logic                  rd_pending;
  int                    checks = 0, failures = 0;

  sram dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // value a word reads as, given the faults that are switched on
  function automatic logic [DW-1:0] faulty(int a, logic [DW-1:0] v);
    logic [DW-1:0] r = v;
    if (flt_en[0] && a == 3)  r[0]  = 1'b0;
    if (flt_en[1] && a == 10) r[15] = 1'b1;
    return r;
  endfunction

  task automatic run_phase(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      if (rd_pending) begin
        checks++;
        if (rdata != expect_q) begin
          failures++;
          $display("FAIL read got %h expected %h", rdata, expect_q);
        end
      end
      en    = $urandom_range(0, 3) != 0;
      we    = $urandom_range(0, 1) == 1;
      addr  = AW'($urandom);
      wdata = DW'($urandom);
      rd_pending = en && !we;
      if (en && we) model[addr] = faulty(int'(addr), wdata);
      else if (en)  expect_q    = faulty(int'(addr), model[addr]);
      if (!en) begin
        // idle cycle: rdata must keep its last value
        rd_pending = 1'b1;
      end
    end
  endtask

  initial begin
    flt_en   = '0;
    flt_addr = '{AW'(10), AW'(3)};
    flt_bit  = '{4'd15, 4'd0};
    flt_val  = 2'b10;
    en = 1'b0; we = 1'b0; addr = '0; wdata = '0; rd_pending = 1'b0;
    // initialise every word so reads are defined
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      en = 1'b1; we = 1'b1; addr = AW'(a); wdata = DW'(a * 16'h1111);
      model[a] = wdata;
    end
    @(negedge clk); en = 1'b1; we = 1'b0; addr = '0; expect_q = model[0];
    rd_pending = 1'b1;
    run_phase(1000);
    // switch on the faults: even untouched words now read through them
    @(negedge clk);
    en = 1'b0;
    flt_en = 2'b11;
    for (int a = 0; a < 16; a++) model[a] = faulty(a, model[a]);
    run_phase(1000);
    // direct check of the two faulty cells
    @(negedge clk); en = 1'b1; we = 1'b1; addr = AW'(3);  wdata = 16'hFFFF;
    @(negedge clk); en = 1'b1; we = 1'b1; addr = AW'(10); wdata = 16'h0000;
    @(negedge clk); en = 1'b1; we = 1'b0; addr = AW'(3);
    @(negedge clk); en = 1'b1; we = 1'b0; addr = AW'(10);
    checks++;
    if (rdata != 16'hFFFE) begin failures++; $display("FAIL SA0 word 3 read %h", rdata); end
    @(negedge clk); en = 1'b0;
    checks++;
    if (rdata != 16'h8000) begin failures++; $display("FAIL SA1 word 10 read %h", rdata); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
