// tb_resp_comparator: random reads with matching or corrupted read data,
// checked against a model of the one-cycle read pipeline: fail_detect must
// pulse two edges after each corrupted read is issued, fail must stick,
// fail_addr must follow the latest failing address, fail_count must count
// them, and clear must reset everything.
module tb_resp_comparator;
  localparam int unsigned AW = 4, DW = 16, CW = 8;
  logic          clk = 1'b0, rst_n = 1'b0;
  logic          clear, rd_issue;
  logic [AW-1:0] issue_addr, fail_addr;
  logic [DW-1:0] exp_data, rdata;
  logic          fail_detect, fail;
  logic [CW-1:0] fail_count;
  // model pipeline
  logic          m_rd1, m_bad1;
  logic [AW-1:0] m_addr1;
  logic [DW-1:0] m_exp1;
  logic          m_det, m_fail;
  logic [AW-1:0] m_faddr;
  int            m_cnt;
  int            checks = 0, failures = 0;

  resp_comparator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1'b0; rd_issue = 1'b0; issue_addr = '0; exp_data = '0; rdata = '0;
    m_rd1 = 1'b0; m_bad1 = 1'b0; m_addr1 = '0; m_exp1 = '0;
    m_det = 1'b0; m_fail = 1'b0; m_faddr = '0; m_cnt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // read data for the read issued in the previous cycle
      m_bad1 = m_rd1 && ($urandom_range(0, 7) == 0);
      rdata  = m_bad1 ? (m_exp1 ^ DW'(1 << $urandom_range(0, DW - 1))) : m_exp1;
      if (!m_rd1) rdata = DW'($urandom);
      clear      = ($urandom_range(0, 199) == 0);
      rd_issue   = $urandom_range(0, 1) == 1;
      issue_addr = AW'($urandom);
      exp_data   = $urandom_range(0, 1) ? '1 : '0;
      @(posedge clk); #1;
      // model update for this edge
      if (clear) begin
        m_det = 1'b0; m_fail = 1'b0; m_faddr = '0; m_cnt = 0;
      end else begin
        m_det = m_bad1;
        if (m_bad1) begin m_fail = 1'b1; m_faddr = m_addr1; if (m_cnt < 255) m_cnt++; end
      end
      m_rd1   = rd_issue && !clear;
      m_addr1 = issue_addr;
      m_exp1  = exp_data;
      checks++;
      if (fail_detect != m_det || fail != m_fail || fail_addr != m_faddr || int'(fail_count) != m_cnt) begin
        failures++;
        $display("FAIL i=%0d det=%0b/%0b fail=%0b/%0b addr=%0d/%0d cnt=%0d/%0d", i,
                 fail_detect, m_det, fail, m_fail, fail_addr, m_faddr, fail_count, m_cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
