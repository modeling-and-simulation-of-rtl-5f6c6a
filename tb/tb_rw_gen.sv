// tb_rw_gen: random march elements and run/idle patterns against a model of
// the operation sequencer: op_idx, mem_en, mem_we and addr_step are checked
// every cycle; one- and two-operation elements both occur.
module tb_rw_gen;
  import mbist_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        start, run;
  march_elem_t elem;
  logic        op_idx, mem_en, mem_we, addr_step;
  logic        m_idx;
  logic        m_last;
  int          n_two = 0, n_one = 0;
  int          checks = 0, failures = 0;

  rw_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 1'b0; run = 1'b0; elem = '0; m_idx = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int e = 0; e < 200; e++) begin
      // new element: one start cycle, then a random number of cycles
      @(negedge clk);
      elem  = march_elem_t'(6'($urandom));
      start = 1'b1; run = 1'b0;
      if (elem.two_ops) n_two++; else n_one++;
      @(posedge clk); #1;
      m_idx = 1'b0;
      checks++;
      if (op_idx != 1'b0) begin failures++; $display("FAIL start did not clear op_idx"); end
      start = 1'b0;
      for (int c = 0; c < 20; c++) begin
        @(negedge clk);
        run = $urandom_range(0, 4) != 0;
        #1;
        m_last = !elem.two_ops || m_idx;
        checks++;
        if (op_idx != m_idx || mem_en != run ||
            mem_we != (run && (m_idx ? elem.op1.wr : elem.op0.wr)) ||
            addr_step != (run && m_last)) begin
          failures++;
          $display("FAIL e=%0d c=%0d op_idx=%0b/%0b en=%0b we=%0b step=%0b", e, c,
                   op_idx, m_idx, mem_en, mem_we, addr_step);
        end
        @(posedge clk);
        if (run) m_idx = m_last ? 1'b0 : 1'b1;
      end
    end
    checks++;
    if (n_two == 0 || n_one == 0) begin failures++; $display("FAIL element kinds not both covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
