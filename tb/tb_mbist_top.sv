// tb_mbist_top: end-to-end test of the memory BIST at its default size
// (16 words of 16 bits), with no parameter overrides.
//
//  1. System mode: the system writes and reads every word through the collar.
//  2. MATS and March C- on the fault-free memory: no failure, and the run
//     length is 4N+6 and 10N+9 cycles; afterwards the system reads back the
//     final background each algorithm leaves (all ones, all zeros).
//  3. Both algorithms with two stuck-at faults (word 3 bit 0 stuck at 0,
//     word 10 bit 15 stuck at 1): every fail_detect pulse must carry the
//     address a reference march model predicts, in order, and fail_count
//     must equal the number of failing reads the model predicts.
//  4. March C- on the sub-range 2..12, with and without faults.
// Each mechanism (system access, collar switch to BIST, each algorithm,
// upward and downward elements, failure detection, sub-range) is counted;
// one that never happened counts as a failure.
module tb_mbist_top;
  import mbist_pkg::*;
  localparam int unsigned AW = 4, DW = 16, NF = 2, CW = 8;

  logic                  clk = 1'b0, rst_n = 1'b0;
  logic                  start_test;
  alg_e                  alg_sel;
  logic [AW-1:0]         lim_lo, lim_hi;
  logic                  bist_on, bist_end, fail_detect, fail;
  logic [AW-1:0]         fail_addr;
  logic [CW-1:0]         fail_count;
  logic                  sys_en, sys_we;
  logic [AW-1:0]         sys_addr;
  logic [DW-1:0]         sys_wdata, sys_rdata;
  logic [NF-1:0]         flt_en;
  logic [NF-1:0][AW-1:0] flt_addr;
  logic [NF-1:0][3:0]    flt_bit;
  logic [NF-1:0]         flt_val;

  int checks = 0, failures = 0;
  int n_sys = 0, n_bist_on = 0, n_mats = 0, n_mcm = 0, n_up = 0, n_down = 0;
  int n_fail_pulse = 0, n_subrange = 0;
  int exp_fail_q[$];

  mbist_top dut (.*);

  always #25 clk = ~clk;  // 20 MHz

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- reference
  // element lists: {down, two_ops, op1.wr, op1.val, op0.wr, op0.val}
  logic [5:0] mats [3] = '{6'b00_10_10, 6'b01_11_00, 6'b00_01_01};
  logic [5:0] mcm  [6] = '{6'b00_10_10, 6'b01_11_00, 6'b01_10_01,
                           6'b11_11_00, 6'b11_10_01, 6'b00_00_00};

  function automatic logic [DW-1:0] stuck(int a, logic [DW-1:0] v);
    logic [DW-1:0] r = v;
    for (int i = 0; i < int'(NF); i++)
      if (flt_en[i] && int'(flt_addr[i]) == a) r[flt_bit[i]] = flt_val[i];
    return r;
  endfunction

  // Runs the march on a model memory; fills exp_fail_q with the addresses
  // of the failing reads in order and returns the expected cycle count.
  function automatic int model_march(alg_e a, int lo, int hi);
    logic [DW-1:0] m [16];
    logic [5:0]    e;
    int            nel, cyc, addr;
    logic [1:0]    op;
    exp_fail_q.delete();
    for (int i = 0; i < 16; i++) m[i] = stuck(i, 16'h5A5A);
    nel = (a == ALG_MATS) ? 3 : 6;
    cyc = 3;
    for (int k = 0; k < nel; k++) begin
      e = (a == ALG_MATS) ? mats[k] : mcm[k];
      cyc += 1 + (e[4] ? 2 : 1) * (hi - lo + 1);
      for (int j = 0; j <= hi - lo; j++) begin
        addr = e[5] ? hi - j : lo + j;
        for (int o = 0; o < (e[4] ? 2 : 1); o++) begin
          op = (o == 0) ? e[1:0] : e[3:2];
          if (op[1]) m[addr] = stuck(addr, {DW{op[0]}});
          else if (stuck(addr, m[addr]) != {DW{op[0]}}) exp_fail_q.push_back(addr);
        end
      end
    end
    return cyc;
  endfunction

  // ---------------------------------------------------------------- monitors
  always @(posedge clk) begin
    if (rst_n && fail_detect) begin
      n_fail_pulse++;
      checks++;
      if (exp_fail_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected fail_detect at address %0d", fail_addr);
      end else begin
        if (int'(fail_addr) != exp_fail_q[0]) begin
          failures++;
          $display("FAIL fail_detect at address %0d expected %0d", fail_addr, exp_fail_q[0]);
        end
        void'(exp_fail_q.pop_front());
      end
    end
    if (dut.u_pattern_ctrl.run) begin
      if (dut.u_pattern_ctrl.elem.down) n_down++; else n_up++;
    end
  end

  // ---------------------------------------------------------------- tasks
  task automatic sys_write(int a, logic [DW-1:0] d);
    @(negedge clk);
    sys_en = 1'b1; sys_we = 1'b1; sys_addr = AW'(a); sys_wdata = d;
    @(negedge clk);
    sys_en = 1'b0; sys_we = 1'b0;
  endtask

  task automatic sys_check(int a, logic [DW-1:0] d);
    @(negedge clk);
    sys_en = 1'b1; sys_we = 1'b0; sys_addr = AW'(a);
    @(negedge clk);
    sys_en = 1'b0;
    checks++;
    n_sys++;
    if (sys_rdata != d) begin
      failures++;
      $display("FAIL system read word %0d got %h expected %h", a, sys_rdata, d);
    end
  endtask

  task automatic run_bist(alg_e a, int lo, int hi);
    int expected, cycles, n_exp;
    expected = model_march(a, lo, hi);
    n_exp = exp_fail_q.size();
    @(negedge clk);
    alg_sel = a; lim_lo = AW'(lo); lim_hi = AW'(hi); start_test = 1'b1;
    cycles = 0;
    while (!bist_end && cycles < 2000) begin
      @(posedge clk); #1;
      cycles++;
      if (bist_on && cycles == 1) n_bist_on++;
    end
    checks++;
    if (cycles != expected) begin
      failures++;
      $display("FAIL alg=%0d range %0d..%0d took %0d cycles expected %0d", a, lo, hi, cycles, expected);
    end
    checks++;
    if (int'(fail_count) != n_exp || fail != (n_exp > 0) || exp_fail_q.size() != 0) begin
      failures++;
      $display("FAIL alg=%0d fail=%0b fail_count=%0d expected %0d, %0d pulses missing",
               a, fail, fail_count, n_exp, exp_fail_q.size());
    end
    $display("alg=%0d range %0d..%0d: %0d cycles, %0d failing reads", a, lo, hi, cycles, fail_count);
    if (a == ALG_MATS) n_mats++; else n_mcm++;
    if (hi - lo != 15) n_subrange++;
    @(negedge clk);
    start_test = 1'b0;
    @(negedge clk);
    checks++;
    if (bist_on || bist_end) begin failures++; $display("FAIL BIST did not release the memory"); end
  endtask

  // ---------------------------------------------------------------- stimulus
  logic [DW-1:0] pattern [16];

  initial begin
    start_test = 1'b0; alg_sel = ALG_MATS; lim_lo = '0; lim_hi = '1;
    sys_en = 1'b0; sys_we = 1'b0; sys_addr = '0; sys_wdata = '0;
    flt_en = '0;
    flt_addr = '{AW'(10), AW'(3)};
    flt_bit  = '{4'd15, 4'd0};
    flt_val  = 2'b10;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. system mode
    for (int a = 0; a < 16; a++) begin
      pattern[a] = DW'($urandom);
      sys_write(a, pattern[a]);
    end
    for (int a = 0; a < 16; a++) sys_check(a, pattern[a]);

    // 2. fault-free memory
    run_bist(ALG_MATS, 0, 15);
    for (int a = 0; a < 16; a++) sys_check(a, 16'hFFFF);
    run_bist(ALG_MARCH_CM, 0, 15);
    for (int a = 0; a < 16; a++) sys_check(a, 16'h0000);

    // 3. stuck-at faults: word 3 bit 0 SA0, word 10 bit 15 SA1
    flt_en = 2'b11;
    run_bist(ALG_MARCH_CM, 0, 15);
    run_bist(ALG_MATS, 0, 15);

    // 4. sub-range, with and without the faults
    run_bist(ALG_MARCH_CM, 2, 12);
    flt_en = 2'b00;
    run_bist(ALG_MARCH_CM, 2, 12);
    // words outside the range still hold the all-ones background of the last
    // full MATS run (word 3 took it through its stuck-at-0 bit); the range
    // ends with March C-'s all-zeros background
    for (int a = 0; a < 16; a++)
      sys_check(a, (a >= 2 && a <= 12) ? 16'h0000 : ((a == 3) ? 16'hFFFE : 16'hFFFF));

    // mechanisms
    checks++; if (n_sys == 0)        begin failures++; $display("FAIL no system access"); end
    checks++; if (n_bist_on == 0)    begin failures++; $display("FAIL collar never switched to BIST"); end
    checks++; if (n_mats == 0)       begin failures++; $display("FAIL MATS never ran"); end
    checks++; if (n_mcm == 0)        begin failures++; $display("FAIL March C- never ran"); end
    checks++; if (n_up == 0)         begin failures++; $display("FAIL no upward element"); end
    checks++; if (n_down == 0)       begin failures++; $display("FAIL no downward element"); end
    checks++; if (n_fail_pulse == 0) begin failures++; $display("FAIL no failure detected"); end
    checks++; if (n_subrange == 0)   begin failures++; $display("FAIL no sub-range test"); end
    $display("mechanisms: system reads=%0d bist runs=%0d mats=%0d march_c-=%0d up ops=%0d down ops=%0d fail pulses=%0d sub-range=%0d",
             n_sys, n_bist_on, n_mats, n_mcm, n_up, n_down, n_fail_pulse, n_subrange);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
