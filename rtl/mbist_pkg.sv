// mbist_pkg: types and algorithm tables shared by the FSM-based memory BIST.
//
// A march test is a list of march elements. Each element visits every
// address of the test range in one direction (up or down) and applies one or
// two operations at each address, e.g. "up(r0,w1)": read and expect the all-0
// word, then write the all-1 word. Two algorithms are held here:
//
//   MATS     : {any(w0); any(r0,w1); any(r1)}                         4n ops
//   March C- : {any(w0); up(r0,w1); up(r1,w0); dn(r0,w1); dn(r1,w0); any(r0)}  10n ops
//
// "any" elements are run upward. The two algorithms and the March C- element
// list follow the published design; MATS is taken in its textbook form since
// its element list is not spelled out there. Adding an algorithm only means
// extending march_elem() and march_num_elems(): the rest of the BIST is
// independent of the algorithm.
package mbist_pkg;

  typedef enum logic [0:0] {
    ALG_MATS     = 1'b0,
    ALG_MARCH_CM = 1'b1
  } alg_e;

  // One memory operation of a march element.
  typedef struct packed {
    logic wr;   // 1: write, 0: read
    logic val;  // data value: the word is this bit replicated
  } march_op_t;

  // One march element: direction, number of operations (1 or 2), operations.
  typedef struct packed {
    logic      down;
    logic      two_ops;   // 0: op0 only, 1: op0 then op1
    march_op_t op1;
    march_op_t op0;
  } march_elem_t;

  localparam int unsigned ELEM_IDX_W = 3;

  typedef enum logic [2:0] {
    PC_IDLE  = 3'd0,  // system owns the memory
    PC_LOAD  = 3'd1,  // load the element's start address
    PC_RUN   = 3'd2,  // apply one operation per cycle
    PC_FLUSH = 3'd3,  // wait for the last read to be compared
    PC_DONE  = 3'd4   // test finished, bist_end high
  } pc_state_e;

  localparam march_op_t OP_W0 = '{wr: 1'b1, val: 1'b0};
  localparam march_op_t OP_W1 = '{wr: 1'b1, val: 1'b1};
  localparam march_op_t OP_R0 = '{wr: 1'b0, val: 1'b0};
  localparam march_op_t OP_R1 = '{wr: 1'b0, val: 1'b1};

  function automatic march_elem_t mk_elem(logic down, logic two_ops,
                                          march_op_t op0, march_op_t op1);
    march_elem_t e;
    e.down    = down;
    e.two_ops = two_ops;
    e.op0     = op0;
    e.op1     = op1;
    return e;
  endfunction

  function automatic logic [ELEM_IDX_W-1:0] march_num_elems(alg_e alg);
    return (alg == ALG_MATS) ? ELEM_IDX_W'(3) : ELEM_IDX_W'(6);
  endfunction

  function automatic march_elem_t march_elem(alg_e alg, logic [ELEM_IDX_W-1:0] idx);
    march_elem_t e;
    e = mk_elem(1'b0, 1'b0, OP_W0, OP_W0);
    if (alg == ALG_MATS) begin
      case (idx)
        3'd0:    e = mk_elem(1'b0, 1'b0, OP_W0, OP_W0);
        3'd1:    e = mk_elem(1'b0, 1'b1, OP_R0, OP_W1);
        3'd2:    e = mk_elem(1'b0, 1'b0, OP_R1, OP_R1);
        default: e = mk_elem(1'b0, 1'b0, OP_R1, OP_R1);
      endcase
    end else begin
      case (idx)
        3'd0:    e = mk_elem(1'b0, 1'b0, OP_W0, OP_W0);
        3'd1:    e = mk_elem(1'b0, 1'b1, OP_R0, OP_W1);
        3'd2:    e = mk_elem(1'b0, 1'b1, OP_R1, OP_W0);
        3'd3:    e = mk_elem(1'b1, 1'b1, OP_R0, OP_W1);
        3'd4:    e = mk_elem(1'b1, 1'b1, OP_R1, OP_W0);
        3'd5:    e = mk_elem(1'b0, 1'b0, OP_R0, OP_R0);
        default: e = mk_elem(1'b0, 1'b0, OP_R0, OP_R0);
      endcase
    end
    return e;
  endfunction

endpackage
