// rw_gen: the read/write generator.
//
// While the pattern controller is in its run state (run = 1) this block issues
// one memory operation per clock cycle: the operations of the current march
// element in order, op0 then (for two-operation elements) op1, at the same
// address. op_idx is the index of the operation being issued. addr_step goes
// high with the last operation at an address, telling the address counter to
// move on after this cycle, so an address is held for one cycle per
// operation of the element. start clears op_idx at the beginning of an element.
//
// mem_en / mem_we are the BIST side of the memory's control: mem_en = run,
// mem_we = the write flag of the operation being issued.
//
// The block's role (how many cycles an address is held, the sequence of reads
// and writes) follows the published architecture; the one-operation-per-cycle
// timing is this design's choice.
module rw_gen
  import mbist_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        run,
  input  march_elem_t elem,
  output logic        op_idx,
  output logic        mem_en,
  output logic        mem_we,
  output logic        addr_step
);
  logic last_op;

  assign last_op   = !elem.two_ops || op_idx;
  assign addr_step = run && last_op;
  assign mem_en    = run;
  assign mem_we    = run && (op_idx ? elem.op1.wr : elem.op0.wr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      op_idx <= 1'b0;
    else if (start)  op_idx <= 1'b0;
    else if (run)    op_idx <= last_op ? 1'b0 : 1'b1;
  end
endmodule
