# FSM-based memory BIST for an embedded SRAM

An embedded SRAM deep inside a chip is hard to reach from the pins. Memory
built-in self-test (MBIST) puts a tiny tester next to it. The tester writes
known patterns, reads them back, and raises a pass/fail flag without any help
from outside. This design builds that tester as a plain finite state machine
with a few counters. It runs one of two march tests, **MATS** or **March C-**,
over a single-port SRAM. A test collar hands the memory back to the normal
system logic whenever the BIST is off.

The RTL is SystemVerilog (IEEE 1800-2017). It is synthesizable except for the
SRAM, which is a model written as an array with stuck-at faults you can switch
on. The default size is 16 words of 16 bits.

## March tests

A march test is a list of *march elements*. Each element visits every address
of the test range in one direction and applies a short, fixed run of
operations at each address. `w0` writes the all-zeros word and `r1` reads and
expects the all-ones word. Between them, the elements make every cell be
written and read in both states, in both address orders.

| algorithm | elements | operations |
|---|---|---|
| MATS | ⇕(w0); ⇕(r0,w1); ⇕(r1) | 4N |
| March C- | ⇕(w0); ⇑(r0,w1); ⇑(r1,w0); ⇓(r0,w1); ⇓(r1,w0); ⇕(r0) | 10N |

N is the number of addresses tested. ⇕ means either order; this design runs
those elements upward. Both tests catch every stuck-at cell. March C- also
catches transition faults, address-decoder faults and most coupling faults.

All the algorithm knowledge lives in one place: the functions `march_elem()`
and `march_num_elems()` in `rtl/mbist_pkg.sv`. An element is packed into 6
bits: `{down, two_ops, op1.wr, op1.val, op0.wr, op0.val}`. To add an
algorithm, extend those two functions. No other block changes, apart from
widening `alg_e` if needed.

## How the controller is divided

```
          start_test, alg_sel                       lim_lo, lim_hi
                 |                                        |
          +--------------+  elem    +--------------+  +---------------+
          | pattern_ctrl |--------->| addr_limiter |<-+               |
          |  (FSM)       |  down    +--------------+                  |
          |              |            first | last                    |
          |              |  load   +--------v-----+   +-----------------+
          |              |-------->| addr_counter |-->| addr_comparator |--max_addr--> pattern_ctrl
          |              |         +--------------+   +-----------------+
          |              |  run       ^ step  | addr
          |              |-------> +--------+  |
          |              |  elem   | rw_gen |--+--- en/we ---+
          +--------------+         +--------+ op_idx         |
                 |                     |                     v
                 | bist_on        +----------+ data     +-------------+      +------+
                 +--------------->| data_gen |--------->| test_collar |<---->| sram |
                                  +----------+          +-------------+      +------+
                                       | expected word      ^  system port      |
                                       v                                         |
                                +-----------------+  <------- read data ---------+
                                | resp_comparator |--> fail_detect, fail, fail_addr, fail_count
                                +-----------------+
```

* **pattern_ctrl** is the FSM with states IDLE, LOAD, RUN, FLUSH and DONE. It
  walks the elements of the chosen algorithm. For each element it spends one
  LOAD cycle putting the start address into the counter. It then stays in RUN
  until the last operation has been issued at the stop address. After the
  last element it waits two FLUSH cycles, so the final read gets compared,
  and then enters DONE.
* **rw_gen** is the read/write generator. In RUN it issues one operation per
  cycle: `op0`, then `op1` for two-operation elements. It raises `addr_step`
  with the last operation at an address, so an address is held for one cycle
  per operation.
* **addr_counter** is the up/down address counter. `load` sets it to the
  element's start address, and `addr_step` moves it one address in the
  element's direction.
* **addr_limiter** turns the range `lim_lo..lim_hi` and the direction into a
  start and a stop address. **addr_comparator** raises `max_addr` when the
  counter reaches the stop address. The element ends when `addr_step` and
  `max_addr` are both high.
* **data_gen** expands the current operation's data bit into a full word. The
  same word is the write data for writes and the expected data for reads.
* **resp_comparator** compares each BIST read with its expected word and keeps
  the status flip-flop.
* **test_collar** connects the memory to the system port while `bist_on` is
  low, and to the BIST while it is high.

## Timing of one test

This is the part that matters most when you connect the design or read a
waveform. All flops are on the rising edge. `rst_n` is an active-low
asynchronous reset.

1. `start_test` is a level. While the FSM is in IDLE, the edge that sees it
   high moves the FSM to LOAD. The same edge latches `alg_sel` and clears
   `fail`, `fail_addr` and `fail_count`. `bist_on` is high from the next cycle.
2. Each element takes 1 LOAD cycle plus (ops × N) RUN cycles.
3. The SRAM returns read data one cycle after the read is issued. The
   comparator registers the expected word and address when the read is
   issued, and compares them in the next cycle. A mismatch gives a one-cycle
   `fail_detect` pulse **two cycles after the failing read was issued**. In
   that same cycle `fail_addr` shows the failing address.
4. After the last element come 2 FLUSH cycles, then DONE. In DONE, `bist_end`
   is high and `bist_on` is low, so the system already has the memory back.
   `bist_end` stays high until `start_test` drops, and the FSM then returns to
   IDLE. `fail`, `fail_addr` and `fail_count` keep the result until the next
   test starts.

Counting from the edge that sees `start_test` to the edge that raises
`bist_end`:

* March C-: 10N + 9 cycles. This is 169 cycles, or 8.45 µs at 20 MHz, for 16
  words.
* MATS: 4N + 6 cycles. This is 70 cycles, or 3.5 µs.

The testbenches check these numbers exactly.

## Fault example

Take two stuck-at faults: word 3 bit 0 stuck at 0, and word 10 bit 15 stuck at
1. Under March C- the BIST reports five failing reads, in this order:

| element | failing read |
|---|---|
| ⇑(r0,w1) | word 10 |
| ⇑(r1,w0) | word 3 |
| ⇓(r0,w1) | word 10 |
| ⇓(r1,w0) | word 3 |
| ⇕(r0) | word 10 |

`fail_count` ends at 5. MATS catches the same two faults with two failing
reads: word 10 in ⇕(r0,w1), then word 3 in ⇕(r1). The end-to-end testbench
runs this case. It compares every `fail_detect` pulse, in order, against a
separate march model written in the testbench.

## Top-level ports (`mbist_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; active-low asynchronous reset |
| start_test | in | 1 | run the BIST; hold high until `bist_end` |
| alg_sel | in | `alg_e` | `ALG_MATS` (0) or `ALG_MARCH_CM` (1) |
| lim_lo, lim_hi | in | AW | address range to test, `lim_lo <= lim_hi` |
| bist_on | out | 1 | the BIST owns the memory |
| bist_end | out | 1 | the test is over |
| fail_detect | out | 1 | one pulse per failing read |
| fail | out | 1 | at least one failing read in this test |
| fail_addr | out | AW | address of the most recent failing read |
| fail_count | out | CW | number of failing reads, saturating |
| sys_en, sys_we, sys_addr, sys_wdata | in | 1,1,AW,DW | system access to the memory while the BIST is off |
| sys_rdata | out | DW | read data, one cycle after a read |
| flt_en, flt_addr, flt_bit, flt_val | in | NF each | slot i makes bit `flt_bit[i]` of word `flt_addr[i]` stuck at `flt_val[i]` |

Parameters:

* `AW` (4): address width, so the memory has 2^AW words.
* `DW` (16): data width.
* `NF` (2): number of fault slots.
* `CW` (8): width of the fail counter.

`pattern_ctrl` also has a `FLUSH_CYCLES` parameter (2). This value assumes the
memory's one-cycle read latency plus the registered `fail_detect`. If you
change the latency, change it too.

In a real chip, replace `sram` with the memory macro and tie `flt_*` to zero
or remove those ports. The controller does not depend on them.

## What is given and what was chosen

**Taken from the original design:**

* The split into pattern controller, read/write generator, address generator,
  address limiter, address comparator, data generator, comparator and test
  collar.
* The two algorithms, MATS and March C-.
* The 16-bit word.
* The signal names `start_test`, `bist_on`, `bist_end` and `fail_detect`.
* A status flip-flop that gives an accept/reject result.
* A memory model that can be given stuck-at faults.
* The 20 MHz test clock.

**Chosen here:**

* **Memory depth of 16 words.** The source gives no depth, only faults at
  words 3 and 10.
* **Algorithm tables.** March C- is given only by its first two elements, so
  the standard 6-element list is used. MATS uses its textbook form.
* **Timing.** One operation per cycle, a LOAD cycle between elements, a
  two-cycle flush, a one-cycle read latency and a registered `fail_detect`.
* **Protocol.** `start_test` is treated as a level, and `alg_sel` selects the
  algorithm.
* **Test range from input ports.** Taking `lim_lo` and `lim_hi` as inputs lets
  you test part of the memory.
* **Extra results.** `fail_addr` and `fail_count` are additions for diagnosis.
* **Fault-injection ports.** The `flt_*` ports are this design's way of making
  the memory faulty.

**Known differences:**

* The original description shows four `fail_detect` pulses for the two-fault
  example. Running the full March C- on those faults gives five failing reads,
  and this design reports five. The four-pulse figure probably shows only
  part of the run.
* Only solid all-0 and all-1 data backgrounds are generated. Checkerboard or
  other address-dependent backgrounds are not implemented, so `data_gen` does
  not use the address.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. `tb_mbist_top` runs the whole design at its
default parameters:

* system access through the collar;
* both algorithms on a fault-free memory;
* both algorithms with the two faults above;
* March C- on the sub-range 2..12.

It also counts how often each of these happened: system accesses, BIST runs,
upward and downward elements, failure pulses and sub-range tests.

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl +libext+.sv \
    rtl/mbist_pkg.sv tb/tb_mbist_top.sv --top-module tb_mbist_top
./obj_dir/Vtb_mbist_top
```

Use the same command with another testbench name for a single block, for
example `tb_pattern_ctrl` or `tb_sram`. Every testbench has a watchdog and
finishes in well under a second.

`pattern_ctrl` asserts that the element index stays within the chosen
algorithm. Lint with `verilator --lint-only -Wall` shows only benign warnings:

* Unused bits of the element struct in `rw_gen` and `data_gen`. Those blocks
  do not need the direction bit.
* Two unconnected debug outputs in `mbist_top`.
* `rst_n` used both as an asynchronous reset and as the assertion's
  `disable iff`.
