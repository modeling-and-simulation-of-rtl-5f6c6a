// addr_counter: the BIST address generator, an up/down counter.
//
// load  : addr <= load_addr (the element's start address), takes priority.
// step  : addr <= addr + 1 (down = 0) or addr - 1 (down = 1).
// Both act on the rising clock edge; addr is a register, reset to 0 by the
// active-low asynchronous reset. The counter wraps modulo 2**AW; the pattern
// controller never steps past the stop address, so wrapping is not used.
module addr_counter #(
  parameter int unsigned AW = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [AW-1:0] load_addr,
  input  logic          step,
  input  logic          down,
  output logic [AW-1:0] addr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      addr <= '0;
    else if (load)   addr <= load_addr;
    else if (step)   addr <= down ? addr - AW'(1) : addr + AW'(1);
  end
endmodule
