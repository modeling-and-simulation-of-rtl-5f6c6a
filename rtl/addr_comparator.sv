// addr_comparator: end-of-range detection for the address generator.
//
// max_addr is high while the address counter holds the stop address of the
// current element, so that the operation issued at that address is the last
// one of the element. Purely combinational.
module addr_comparator #(
  parameter int unsigned AW = 4
) (
  input  logic [AW-1:0] addr,
  input  logic [AW-1:0] last_addr,
  output logic          max_addr
);
  assign max_addr = (addr == last_addr);
endmodule
