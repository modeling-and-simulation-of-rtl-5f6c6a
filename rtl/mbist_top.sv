// mbist_top: FSM-based memory BIST with its test collar and the SRAM under test.
//
// The BIST controller is split into the blocks of the published architecture:
// pattern controller (FSM over the march elements), read/write generator,
// address generator (up/down counter), address limiter, address comparator,
// data generator and response comparator. The test collar gives the memory to
// the system while the BIST is off and to the BIST while it runs.
//
// Use: with start_test low the system drives sys_* and reads sys_rdata one
// cycle after a read. Raising start_test (held high) runs the algorithm
// chosen by alg_sel (0 = MATS, 1 = March C-) over addresses lim_lo..lim_hi:
// bist_on rises one cycle later, fail_detect pulses once per failing read,
// and bist_end rises when the test is over; fail, fail_addr and fail_count
// then hold the result until the next test. Dropping start_test returns the
// memory to the system. A March C- test of N addresses takes 10N + 9 cycles,
// MATS 4N + 6 (see pattern_ctrl).
//
// flt_* inject stuck-at faults into the SRAM model (see sram) to exercise the
// BIST; tie flt_en low for a fault-free memory. Defaults: 16 addresses of
// 16-bit words, two fault slots. The 16-bit word follows the published test;
// the number of addresses is this design's choice.
module mbist_top
  import mbist_pkg::*;
#(
  parameter int unsigned AW = 4,
  parameter int unsigned DW = 16,
  parameter int unsigned NF = 2,
  parameter int unsigned CW = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // BIST control and status
  input  logic                          start_test,
  input  alg_e                          alg_sel,
  input  logic [AW-1:0]                 lim_lo,
  input  logic [AW-1:0]                 lim_hi,
  output logic                          bist_on,
  output logic                          bist_end,
  output logic                          fail_detect,
  output logic                          fail,
  output logic [AW-1:0]                 fail_addr,
  output logic [CW-1:0]                 fail_count,
  // system port
  input  logic                          sys_en,
  input  logic                          sys_we,
  input  logic [AW-1:0]                 sys_addr,
  input  logic [DW-1:0]                 sys_wdata,
  output logic [DW-1:0]                 sys_rdata,
  // stuck-at fault injection into the memory under test
  input  logic [NF-1:0]                 flt_en,
  input  logic [NF-1:0][AW-1:0]         flt_addr,
  input  logic [NF-1:0][$clog2(DW)-1:0] flt_bit,
  input  logic [NF-1:0]                 flt_val
);


  march_elem_t              elem;
  logic                     clear, load, run;
  logic                     op_idx, addr_step, max_addr;
  logic [AW-1:0]            addr, first_addr, last_addr;
  logic                     bist_en, bist_we;
  logic [DW-1:0]            bist_data, bist_rdata;
  logic                     mem_en, mem_we;
  logic [AW-1:0]            mem_addr;
  logic [DW-1:0]            mem_wdata, mem_rdata;

  pattern_ctrl u_pattern_ctrl (
    .clk, .rst_n, .start_test, .alg(alg_sel), .addr_step, .max_addr,
    .state(), .elem_idx(), .elem, .clear, .load, .run, .bist_on, .bist_end
  );

  rw_gen u_rw_gen (
    .clk, .rst_n, .start(load), .run, .elem, .op_idx,
    .mem_en(bist_en), .mem_we(bist_we), .addr_step
  );

  addr_limiter #(.AW(AW)) u_addr_limiter (
    .lim_lo, .lim_hi, .down(elem.down), .first_addr, .last_addr
  );

  addr_counter #(.AW(AW)) u_addr_counter (
    .clk, .rst_n, .load, .load_addr(first_addr), .step(addr_step),
    .down(elem.down), .addr
  );

  addr_comparator #(.AW(AW)) u_addr_comparator (
    .addr, .last_addr, .max_addr
  );

  data_gen #(.DW(DW)) u_data_gen (
    .elem, .op_idx, .data(bist_data)
  );

  resp_comparator #(.AW(AW), .DW(DW), .CW(CW)) u_resp_comparator (
    .clk, .rst_n, .clear, .rd_issue(bist_en && !bist_we), .issue_addr(addr),
    .exp_data(bist_data), .rdata(bist_rdata),
    .fail_detect, .fail, .fail_addr, .fail_count
  );

  test_collar #(.AW(AW), .DW(DW)) u_test_collar (
    .bist_on,
    .sys_en, .sys_we, .sys_addr, .sys_wdata, .sys_rdata,
    .bist_en, .bist_we, .bist_addr(addr), .bist_wdata(bist_data), .bist_rdata,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata
  );

  sram #(.AW(AW), .DW(DW), .NF(NF)) u_sram (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .rdata(mem_rdata), .flt_en, .flt_addr, .flt_bit, .flt_val
  );
endmodule
