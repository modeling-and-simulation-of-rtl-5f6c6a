// resp_comparator: the BIST response comparator and status flip-flop.
//
// The memory answers a read one cycle after it is issued. When the BIST
// issues a read (rd_issue) this block registers the expected word and the
// address; in the next cycle it compares the word the memory returns (rdata)
// with the expected one. A mismatch produces, one edge later:
//   fail_detect : a one-cycle pulse per failing read,
//   fail        : sticky pass/fail flag (the status flip-flop),
//   fail_addr   : address of the most recent failing read,
//   fail_count  : number of failing reads, saturating.
// clear (start of a test) resets all of these and drops any read in flight.
//
// Comparing read data with the data generator's word, the fail_detect pulse
// and the accumulated accept/reject flag follow the published design;
// fail_addr and fail_count are this design's additions for diagnosis.
module resp_comparator #(
  parameter int unsigned AW = 4,
  parameter int unsigned DW = 16,
  parameter int unsigned CW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          rd_issue,
  input  logic [AW-1:0] issue_addr,
  input  logic [DW-1:0] exp_data,
  input  logic [DW-1:0] rdata,
  output logic          fail_detect,
  output logic          fail,
  output logic [AW-1:0] fail_addr,
  output logic [CW-1:0] fail_count
);
  logic          rd_q;
  logic [AW-1:0] addr_q;
  logic [DW-1:0] exp_q;
  logic          mismatch;

  assign mismatch = rd_q && (rdata != exp_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q   <= 1'b0;
      addr_q <= '0;
      exp_q  <= '0;
    end else begin
      rd_q   <= rd_issue && !clear;
      addr_q <= issue_addr;
      exp_q  <= exp_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fail_detect <= 1'b0;
      fail        <= 1'b0;
      fail_addr   <= '0;
      fail_count  <= '0;
    end else if (clear) begin
      fail_detect <= 1'b0;
      fail        <= 1'b0;
      fail_addr   <= '0;
      fail_count  <= '0;
    end else begin
      fail_detect <= mismatch;
      if (mismatch) begin
        fail      <= 1'b1;
        fail_addr <= addr_q;
        if (fail_count != '1) fail_count <= fail_count + CW'(1);
      end
    end
  end
endmodule
