// test_collar: steers the memory port between the system and the BIST.
//
// bist_on = 0: the system's enable, write enable, address and data reach the
// memory. bist_on = 1: the BIST controller's do. The memory's read data goes
// to both sides. Purely combinational, so the memory's one-cycle read latency
// is the same for both users.
//
// The collar and its selection by the BIST-on signal follow the published
// design; the port list is this design's.
module test_collar #(
  parameter int unsigned AW = 4,
  parameter int unsigned DW = 16
) (
  input  logic          bist_on,
  // system side
  input  logic          sys_en,
  input  logic          sys_we,
  input  logic [AW-1:0] sys_addr,
  input  logic [DW-1:0] sys_wdata,
  output logic [DW-1:0] sys_rdata,
  // BIST side
  input  logic          bist_en,
  input  logic          bist_we,
  input  logic [AW-1:0] bist_addr,
  input  logic [DW-1:0] bist_wdata,
  output logic [DW-1:0] bist_rdata,
  // memory side
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [DW-1:0] mem_wdata,
  input  logic [DW-1:0] mem_rdata
);
  always_comb begin
    if (bist_on) begin
      mem_en    = bist_en;
      mem_we    = bist_we;
      mem_addr  = bist_addr;
      mem_wdata = bist_wdata;
    end else begin
      mem_en    = sys_en;
      mem_we    = sys_we;
      mem_addr  = sys_addr;
      mem_wdata = sys_wdata;
    end
  end
  assign sys_rdata  = mem_rdata;
  assign bist_rdata = mem_rdata;
endmodule
