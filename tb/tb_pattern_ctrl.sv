// tb_pattern_ctrl: the pattern controller against a model of the address
// range and the read/write generator. For both algorithms and random range
// sizes it checks the sequence of march elements (against the MATS and
// March C- lists written out here), that bist_on covers the test, and the
// number of cycles from start_test to bist_end:
//   3 + sum over elements (1 + ops * N).
module tb_pattern_ctrl;
  import mbist_pkg::*;
  logic                  clk = 1'b0, rst_n = 1'b0;
  logic                  start_test;
  alg_e                  alg;
  logic                  addr_step, max_addr;
  pc_state_e             state;
  logic [ELEM_IDX_W-1:0] elem_idx;
  march_elem_t           elem;
  logic                  clear, load, run, bist_on, bist_end;
  int                    n_addr, cnt, opn;
  int                    checks = 0, failures = 0;

  // reference element lists: {down, two_ops, op1.wr, op1.val, op0.wr, op0.val}
  // "w0"=2'b10 "w1"=2'b11 "r0"=2'b00 "r1"=2'b01
  logic [5:0] mats [3] = '{6'b00_10_10, 6'b01_11_00, 6'b00_01_01};
  logic [5:0] mcm  [6] = '{6'b00_10_10, 6'b01_11_00, 6'b01_10_01,
                           6'b11_11_00, 6'b11_10_01, 6'b00_00_00};

  pattern_ctrl dut (.*);

  always #5 clk = ~clk;

  // model of the address counter and read/write generator
  assign addr_step = run && (!elem.two_ops || opn == 1);
  assign max_addr  = (cnt == n_addr - 1);
  always_ff @(posedge clk) begin
    if (load) begin
      cnt <= 0; opn <= 0;
    end else if (run) begin
      opn <= addr_step ? 0 : 1;
      if (addr_step) cnt <= cnt + 1;
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_test(alg_e a, int n);
    int nel, cycles, ei, expected;
    logic [5:0] ref_e;
    n_addr = n;
    nel = (a == ALG_MATS) ? 3 : 6;
    expected = 3;
    for (int i = 0; i < nel; i++) begin
      ref_e = (a == ALG_MATS) ? mats[i] : mcm[i];
      expected += 1 + (ref_e[4] ? 2 : 1) * n;
    end
    @(negedge clk);
    alg = a; start_test = 1'b1;
    cycles = 0; ei = 0;
    while (!bist_end && cycles < 1000) begin
      @(posedge clk); #1;
      cycles++;
      if (load) begin
        ref_e = (a == ALG_MATS) ? mats[ei] : mcm[ei];
        checks++;
        if (6'(elem) != ref_e) begin
          failures++;
          $display("FAIL alg=%0d element %0d is %b expected %b", a, ei, 6'(elem), ref_e);
        end
        ei++;
      end
      if (!bist_end) begin
        checks++;
        if (!bist_on) begin failures++; $display("FAIL bist_on low during test at cycle %0d", cycles); end
      end
    end
    checks++;
    if (ei != nel) begin failures++; $display("FAIL alg=%0d ran %0d elements", a, ei); end
    checks++;
    if (cycles != expected) begin
      failures++;
      $display("FAIL alg=%0d n=%0d took %0d cycles expected %0d", a, n, cycles, expected);
    end
    checks++;
    if (bist_on) begin failures++; $display("FAIL bist_on high at end"); end
    // bist_end holds while start_test stays high
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (!bist_end) begin failures++; $display("FAIL bist_end dropped"); end
    @(negedge clk); start_test = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (bist_end || state != PC_IDLE) begin failures++; $display("FAIL did not return to idle"); end
  endtask

  initial begin
    start_test = 1'b0; alg = ALG_MATS; n_addr = 16;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    checks++;
    if (bist_on || bist_end) begin failures++; $display("FAIL not idle after reset"); end
    one_test(ALG_MATS, 16);
    one_test(ALG_MARCH_CM, 16);
    for (int k = 0; k < 10; k++) one_test(alg_e'($urandom_range(0, 1)), $urandom_range(1, 16));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
