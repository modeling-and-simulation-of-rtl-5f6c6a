// pattern_ctrl: the pattern controller, the FSM at the heart of the BIST.
//
// States (mbist_pkg::pc_state_e):
//   IDLE  : the system owns the memory. start_test high -> latch alg, clear the
//           comparator (clear pulse), go to LOAD with element 0.
//   LOAD  : one cycle; load = 1 puts the element's start address into the
//           address counter and clears the read/write generator.
//   RUN   : run = 1; one operation per cycle. When the last operation is issued
//           at the stop address (addr_step && max_addr) go to LOAD with the
//           next element, or to FLUSH after the last element.
//   FLUSH : FLUSH_CYCLES cycles, so that the last read has been compared and
//           its fail_detect pulse has been produced.
//   DONE  : bist_end = 1 until start_test goes low, then IDLE.
// bist_on is high in LOAD, RUN and FLUSH, and steers the test collar.
//
// Timing: from the clock edge that samples start_test in IDLE to the edge
// that enters DONE there are sum over elements of (1 + ops * N) + FLUSH_CYCLES
// + 1 edges, N being the number of addresses in the range; for March C- this
// is 10N + 6 + 3 edges, for MATS 4N + 3 + 3.
//
// The FSM that walks the elements of MATS or March C- until the maximum address
// and then reaches a finish state follows the published design; the LOAD state
// between elements and the flush are this design's choices.
module pattern_ctrl
  import mbist_pkg::*;
#(
  parameter int unsigned FLUSH_CYCLES = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start_test,
  input  alg_e                  alg,
  input  logic                  addr_step,
  input  logic                  max_addr,
  output pc_state_e             state,
  output logic [ELEM_IDX_W-1:0] elem_idx,
  output march_elem_t           elem,
  output logic                  clear,
  output logic                  load,
  output logic                  run,
  output logic                  bist_on,
  output logic                  bist_end
);
  alg_e       alg_q;
  logic [1:0] flush_cnt;
  logic       elem_done;
  logic       last_elem;

  assign elem      = march_elem(alg_q, elem_idx);
  assign elem_done = (state == PC_RUN) && addr_step && max_addr;
  assign last_elem = (elem_idx == march_num_elems(alg_q) - ELEM_IDX_W'(1));

  assign clear    = (state == PC_IDLE) && start_test;
  assign load     = (state == PC_LOAD);
  assign run      = (state == PC_RUN);
  assign bist_on  = (state == PC_LOAD) || (state == PC_RUN) || (state == PC_FLUSH);
  assign bist_end = (state == PC_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= PC_IDLE;
      alg_q     <= ALG_MATS;
      elem_idx  <= '0;
      flush_cnt <= '0;
    end else begin
      unique case (state)
        PC_IDLE: if (start_test) begin
          alg_q    <= alg;
          elem_idx <= '0;
          state    <= PC_LOAD;
        end
        PC_LOAD: state <= PC_RUN;
        PC_RUN: if (elem_done) begin
          if (last_elem) begin
            flush_cnt <= '0;
            state     <= PC_FLUSH;
          end else begin
            elem_idx <= elem_idx + ELEM_IDX_W'(1);
            state    <= PC_LOAD;
          end
        end
        PC_FLUSH: begin
          flush_cnt <= flush_cnt + 2'd1;
          if (flush_cnt == 2'(FLUSH_CYCLES - 1)) state <= PC_DONE;
        end
        PC_DONE: if (!start_test) state <= PC_IDLE;
        default: state <= PC_IDLE;
      endcase
    end
  end

  // The element index never runs past the algorithm's last element.
  a_elem_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    state != PC_IDLE |-> elem_idx < march_num_elems(alg_q));
endmodule
