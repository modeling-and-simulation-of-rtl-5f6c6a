// data_gen: the BIST data generator.
//
// Picks the operation of the current march element that the read/write
// generator is issuing (op_idx) and expands its data value into a full word:
// all zeros for w0/r0, all ones for w1/r1. The same word is the write data of
// a write and the expected data of a read. Purely combinational.
//
// Solid all-0 / all-1 words are what the published test uses (it writes and
// reads sixteen zeros and sixteen ones); the word width DW defaults to its 16
// bits.
module data_gen
  import mbist_pkg::*;
#(
  parameter int unsigned DW = 16
) (
  input  march_elem_t   elem,
  input  logic          op_idx,
  output logic [DW-1:0] data
);
  logic val;
  assign val  = op_idx ? elem.op1.val : elem.op0.val;
  assign data = {DW{val}};
endmodule
