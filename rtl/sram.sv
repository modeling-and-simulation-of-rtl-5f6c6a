// sram: single-port synchronous SRAM used as the memory under test, with
// injectable stuck-at faults.
//
// 2**AW words of DW bits. On a rising edge with en = 1: we = 1 writes wdata,
// we = 0 reads the addressed word into rdata (valid in the next cycle;
// rdata holds its value otherwise). There is no reset of the array.
//
// Fault injection: NF fault slots. Slot i, when flt_en[i] is high, makes bit
// flt_bit[i] of word flt_addr[i] stuck at flt_val[i]: the stuck value is both
// stored on a write and returned on a read, so the cell behaves as a stuck-at
// cell whatever was written before the fault was enabled. With all flt_en low
// the memory is fault free.
//
// A memory model that can be switched into a stuck-at defective state follows
// the published experiments; the fault-slot ports are this design's choice.
module sram #(
  parameter int unsigned AW = 4,
  parameter int unsigned DW = 16,
  parameter int unsigned NF = 2
) (
  input  logic                  clk,
  input  logic                  en,
  input  logic                  we,
  input  logic [AW-1:0]         addr,
  input  logic [DW-1:0]         wdata,
  output logic [DW-1:0]         rdata,
  input  logic [NF-1:0]         flt_en,
  input  logic [NF-1:0][AW-1:0] flt_addr,
  input  logic [NF-1:0][$clog2(DW)-1:0] flt_bit,
  input  logic [NF-1:0]         flt_val
);
  localparam int unsigned DEPTH = 1 << AW;

  logic [DW-1:0] mem [DEPTH];
  logic [DW-1:0] sa0_mask;  // bits of the addressed word stuck at 0
  logic [DW-1:0] sa1_mask;  // bits of the addressed word stuck at 1

  always_comb begin
    sa0_mask = '0;
    sa1_mask = '0;
    for (int i = 0; i < int'(NF); i++) begin
      if (flt_en[i] && flt_addr[i] == addr) begin
        if (flt_val[i]) sa1_mask[flt_bit[i]] = 1'b1;
        else            sa0_mask[flt_bit[i]] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= (wdata & ~sa0_mask) | sa1_mask;
      else    rdata     <= (mem[addr] & ~sa0_mask) | sa1_mask;
    end
  end
endmodule
