# Skewed-clock pipeline memory with single-stage bypass

Pipelines whose stages talk through block RAMs are often slowed by the RAM
itself. The RAM sits away from the logic that uses it. Its write port wants
the data early, and its read port delivers the data late. Adding register
stages on both ports makes the clock faster, but it adds latency, and a
processor pipeline wants a word written by one stage to be readable by the
next stage in the very next cycle.

This design keeps single-cycle communication and still lets the RAM ports
borrow time, by clocking them on purpose at a different phase from the rest
of the pipeline:

* the **write port** runs on a copy of the clock delayed by `delta_wr`, so the
  logic that computes the write data may take up to `T + delta_wr`;
* the **read port** may run on a copy advanced by `delta_rd`, so the read
  word is ready `delta_rd` earlier;
* a **one-entry bypass** (last write address, write enable and write data in
  registers, an address comparator and a 2:1 mux) returns the word written
  on the same edge. Because of it, moving the RAM's clock edges never changes
  what a reader sees.

With all clocks tied together the same RTL is the ordinary bypassed memory,
which serves as the baseline. The skews cost no logic. They need two extra
clock outputs, for example from a PLL with phase-shifted outputs or from a
chain of delay cells.

On a Cyclone IV E (C7) the technique was characterised at 16-bit data and
8-bit addresses:

| Memory | F_MAX (STA) | F_MAX (measured) | LUTs | FFs |
|---|---|---|---|---|
| Baseline bypass | 113 MHz | 153 MHz | 21 | 17 |
| Two-stage pipelined bypass | 179 MHz | 208 MHz | 37 | 34 |
| Skewed ports, `delta_wr` = 2.0 ns, `delta_rd` = 0 | 183 MHz | 238 MHz | 21 | 17 |

Only the first and third rows are this RTL: the second is a different
circuit, kept here for comparison. Those figures depend on the FPGA and on
placement. Nothing in this repository reproduces them (see *Limits*).

## The bypassed memory (`skew_bypass_mem`)

```
            wr_addr,we ──► [wa_q,we_q] (clk, or clk_rd) ──┐
                                                          =?──► bypass_hit
            rd_addr ────► [ra_q] (clk_rd) ────────────────┘          │
                                                                     ▼
  wr_data ──► [wd_q] (clk_wr) ───────────────────────────────► 1 ┐
                                                                  mux ─► rd_data
  wr_*    ──► bram_sdp write port (clk_wr)                        │
  rd_addr ──► bram_sdp read port  (clk_rd) ─── ram_q ────────► 0 ┘
```

Semantics, per cycle *n*: the requests presented in cycle *n* are a write
(`we`, `wr_addr`, `wr_data`) and a read (`rd_addr`). The read answer is on
`rd_data` in cycle *n+1*. It already contains the write of cycle *n*: the
memory is write-first. The RAM cannot do this on its own, because a read on
the edge that writes an address returns the old word (`bram_sdp` models this).
So when the read address registered on an edge equals the write address
registered on the same edge, and that write was enabled, the mux picks
`wd_q`.

### Which register runs on which clock

| Register | Clock | Why |
|---|---|---|
| RAM write port, `wd_q` | `clk_wr` (late) | captures the slow write data late |
| RAM read port, `ra_q` | `clk_rd` (early) | starts the array access early |
| `wa_q`, `we_q` | `clk`, or `clk_rd` if `WA_ON_RD_CLK = 1` | the address is ready early; no need to delay it |

The comparator sees only registered values, so the skews do not change the
function. They change only when each value becomes valid: `rd_data` settles
after the later of the `clk_rd` and `clk_wr` edges.

### Choosing the skews

There are four register-to-register paths through a stage. Each runs from a
bypass register or the RAM read port, through the mux and the stage logic,
into the next bypass register or RAM write port:

1. `wd_q` → mux → logic → next `wd_q`: both ends on `clk_wr`, so skew cannot
   help this path. It sets the clock period.
2. `wd_q` → … → RAM write port: make `delta_wr` large enough that this path
   is no worse than path 1. That is, `delta_wr` covers the extra routing and
   setup of the RAM write port compared with a flip-flop.
3. RAM read port → … → `wd_q`: make `delta_rd` large enough that the RAM's
   slower clock-to-output and routing are no worse than those of `wd_q`.
4. RAM read → … → RAM write: with the two choices above, it is no worse than
   path 1 either.

So both skews depend only on the RAM's timing relative to a flip-flop. They
can be characterised once per device, and the memory can be delivered as a
pre-built block. In the characterised device the best setting was
`delta_wr` = 2.0 ns and `delta_rd` = 0.

### The price: hold time

A write port clocked `delta_wr` late captures, on a late edge, signals that
the main clock launched at the start of the same cycle. Any path that
reaches the write port in less than `delta_wr` is then captured one cycle
too early (a hold violation). To be safe, give every such short path a
minimum delay of `delta_wr + delta_rd`. The RTL cannot express this: it is a
timing constraint or delay padding in the implementation flow.
`tb_skew_bypass_mem` and `tb_skew_test_top` both show the failure when the
padding is missing.

Ordering also needs `delta_wr + delta_rd < T`.

## The pipeline (`mem_pipeline`, `mul_stage`)

The pipeline is a feed-forward chain of `STAGES+1` skewed memories. Between
each pair sits an 8×8-bit multiplier stage. Stage *s* reads memory *s−1*,
multiplies the upper and lower byte of the word, and writes the 16-bit
product into memory *s*. Every memory is written and read each cycle at
addresses given from outside. A word written by stage *s* in cycle *n* can be
read by stage *s+1* in cycle *n+1*, through the bypass. All memories share
the three clocks.

## The test circuit (`skew_test_top`)

Proving that a skewed pipeline really works at speed needs a self-checking
circuit that runs on the chip:

* **DUT wrapper** (`pipe_wrapper` on `clk_fast`, `clk_fast_wr`,
  `clk_fast_rd`). On `start` it runs one trace of 2^`IDX_W`−1 cycles. In each
  cycle every memory gets a write and a read address from its own
  **two-level LFSR generator** (`addr_gen`): an address LFSR that is reloaded
  every 16 cycles from a second LFSR. In about one cycle in eight the
  generator forces the read address to equal the write address, so the bypass
  is exercised. Memory 0 is fed from a 16-bit data LFSR. Each cycle is tagged
  by a **one-pass index LFSR**, which visits every non-zero `IDX_W`-bit value
  once. The word read from the last memory is presented 2 edges later with
  its tag (the first output comes 3 edges after the start edge).
* **Trace RAM** (`bram_sdp`, written on `clk_fast`, read on `clk_slow`). It
  stores each traced word at its tag.
* **Reference wrapper**. This is an identical `pipe_wrapper` on the slow
  clock, with no skew, so it meets timing with margin. It reruns the same
  trace, reads the stored word for each tag and compares it with its own
  word. Mismatches increment `error_count` and set the sticky `error`.
* **Loop control** (`test_ctrl`). It starts a DUT trace, then a reference
  trace after the DUT trace has finished, counts the loop in `loops`, and
  repeats. Requests cross between the clock domains as toggles through
  two-flop synchronizers, so the two clocks may have any ratio.

The wrappers have no clock enables. The two wrappers start from identical
memory contents: the power-up values are a hash of the address
(`skew_mem_pkg::init_word`). A wrapper writes only during a trace, and
memories after the first skip the first trace cycle, whose stage input
predates the trace. So after every loop both pipelines hold identical
contents, and the next loop is a fresh test.

`dut_hit_count` / `dut_forced_count` (and the `ref_` pair) report how often
the bypass was used and how often addresses were forced in the last trace.

### Clocks the top expects

| Port | Source |
|---|---|
| `clk_fast` | main DUT clock |
| `clk_fast_wr` | `clk_fast` delayed by `delta_wr` |
| `clk_fast_rd` | `clk_fast` advanced by `delta_rd`, i.e. delayed by `T − delta_rd` |
| `clk_slow` | any slower clock for the reference |
| `rst_n` | asynchronous, active low; hold it for a few `clk_slow` cycles |

## Files

| File | Content |
|---|---|
| `rtl/skew_mem_pkg.sv` | widths, LFSR taps, power-up hash |
| `rtl/bram_sdp.sv` | dual-clock simple dual-port RAM, old data on collision |
| `rtl/skew_bypass_mem.sv` | the skewed memory with bypass |
| `rtl/mul_stage.sv` | 8×8 multiplier stage |
| `rtl/mem_pipeline.sv` | chain of memories and stages |
| `rtl/lfsr.sv` | Fibonacci LFSR with load |
| `rtl/addr_gen.sv` | two-level LFSR address generator |
| `rtl/pipe_wrapper.sv` | trace generator around the pipeline |
| `rtl/test_ctrl.sv` | DUT/reference loop sequencer |
| `rtl/skew_test_top.sv` | the test circuit (top) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Parameters: `DATA_W = 16`, `ADDR_W = 8` (the characterised configuration).
`STAGES = 4`, `IDX_W = 8` (255-word traces) and all seeds, polynomials and the
force pattern (`3'b101` on three address-LFSR bits) are this design's own
choices.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself; a
watchdog counts a failure if it hangs. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl rtl/skew_mem_pkg.sv tb/tb_skew_test_top.sv --top-module tb_skew_test_top
./obj_dir/Vtb_skew_test_top
```

Replace the testbench name to run another. All of them finish in well under
a second.

* `tb_skew_bypass_mem` is the testbench for the central idea. It generates
  really skewed clocks and models the driving logic by input delays. It runs
  the unskewed baseline at 100 MHz. It then runs 238 MHz with
  `delta_wr` = 2.0 ns and a 5.5 ns write-data path, which is longer than the
  4.2 ns period. Last, it runs `delta_wr` = 1.5 ns with `delta_rd` = 0.8 ns.
  Both settings of `WA_ON_RD_CLK` run side by side. Every read and every
  bypass flag is compared with a write-first model. A last run leaves the
  write paths shorter than `delta_wr` and requires the memory to go wrong.
* `tb_skew_test_top` runs the whole test circuit at its default size. It
  does three loops at 238 MHz with no skew, and checks 255 compared words
  per loop, no errors, a 258-cycle DUT busy time, and bypass and forced
  addresses in every trace. It then delays `clk_fast_wr` by 2 ns without
  modelling gate delays: the unpadded short paths corrupt the DUT, and the
  test requires the circuit to detect that.
* `tb_pipe_wrapper` checks each traced word and tag against a complete
  software model of the generators and memories. `tb_mem_pipeline`,
  `tb_addr_gen`, `tb_lfsr`, `tb_bram_sdp`, `tb_mul_stage` and `tb_test_ctrl`
  check their blocks the same way.

## Limits and departures

* **No gate delays in the system-level simulation.** Logic switches in zero
  time, so a skewed write clock inside `skew_test_top` always sees a hold
  violation. The top is therefore verified with the clocks aligned, and the
  skewed timing is verified on the memory alone with modelled delays.
* **Flip-flop count.** `skew_bypass_mem` keeps its own copy of the read
  address for the comparator. It holds 33 flip-flops: 16 data, 8 write
  address, 8 read address and 1 enable. The characterised circuit reported
  17, apparently by sharing the RAM's internal address registers, which
  portable RTL cannot reach.
* **Short-path padding and skew values** belong to the implementation flow.
  They are not in the RTL.
* **Two-stage pipelined bypass** (the faster conventional alternative) and the
  retimed variants are comparison points only and are not included.
* The stage count, the multiplier's operand split, the trace length, the
  LFSR polynomials and seeds, the handshake in `test_ctrl` and the power-up
  hash are this design's choices.
