# Cyclic-flipping BTI mitigation for an SRAM data memory

Bias temperature instability (BTI) ages a transistor while it sits under a
constant gate bias, and it partly recovers once the bias is removed. In a
6T SRAM cell, two of the four cross-coupled transistors are under stress for
as long as the cell holds the same value. A word that a program never rewrites,
such as a constant table, a key, or a stack area that is never used, keeps its cells
under static stress for seconds to years. This unbalanced ageing lowers the
cell's static noise margin. Reads of mostly-zero or mostly-one data also
age the sense amplifiers unevenly, which raises their offset voltage.

This design keeps every cell moving. In the background, the memory reads
one word at a time, inverts it and writes it back, walking the whole
array. It then walks the array a second time and restores every word.
Each cell therefore stores its true value for half of every pass and the
complement for the other half. Its long-run duty factor becomes 0.5, and no
cell is left under the same stress for longer than half a pass. The processor
still sees an ordinary single-port RAM with true data. It is never stalled,
because flips only use cycles in which it does not access the memory.

The RTL models the 32 KiB data RAM of a small RISC-V microcontroller:
8192 words of 32 bits.

## The inverted region

Which words are stored inverted is described by two indexes, `start_idx`
and `end_idx`, each one bit wider than a word address. A word at address `a` is
stored inverted exactly when `start_idx <= a < end_idx`. A pass has four
visible stages:

| stage | start_idx | end_idx | contents |
|---|---|---|---|
| pass begins | 0 | 0 | all true |
| first half | 0 | moves 0 → 8192 | `[0, end)` inverted, rest true |
| halfway | 0 | 8192 | all inverted |
| second half | moves 0 → 8192 | 8192 | `[0, start)` true, `[start, 8192)` inverted |

When `start_idx` would reach 8192, both indexes return to 0 and the next pass
begins. Each step is one word, and the word is always the one at the moving index.
With only two counters and two comparators, the polarity of any address is known in the
same cycle. No per-word flag bits are needed.

The step that advances an index is also the step that writes the complemented
word, and both take effect at the same clock edge. Because of that, the region
test is exact in every cycle.

## Flip steps and sharing the port with the CPU

`flip_counter` raises `tick` once every `cfg_interval` cycles. Each tick asks
`flip_control` for one step:

1. **read:** read the word at the moving index. This waits for a cycle with no CPU access.
2. **latch:** take the word from the array's output register.
3. **write:** write its complement. This also waits for a free cycle. The index advances at the same clock edge.

A step therefore takes at least 3 cycles and uses the memory port twice.
Two things can disturb a step:

- **CPU write to the word in flight.** The CPU may write the word after it was read and before its
  complement is written back. The latched copy is then stale. The step restarts
  from the read (`restart` pulse), so the CPU's data is never overwritten.
- **Ticks faster than steps.** This happens with very short intervals under heavy traffic. One tick is
  queued while a step is in progress. A further tick is dropped and reported on
  `overrun`. At the evaluated intervals (255 cycles and up), a step finishes long before
  the next tick, except under pathological traffic.

`flip_interface` gives the CPU the array whenever `cpu_req` is high and
grants the flipping control only idle cycles. For a CPU write to an inverted
word, it stores the complement of the enabled bytes. For a CPU read, it
records the word's polarity at the read and complements the data when the
data comes back one cycle later. Every CPU request is accepted immediately.

## Rate and the static-stress bound

With no contention, one word is flipped every `cfg_interval` cycles. A full
pass is 2 × 8192 steps. Each cell therefore holds one value for at most

    T_static = cfg_interval × 8192 cycles

and a pass takes `2 × cfg_interval × 8192` cycles. The intervals studied for
this scheme, with the resulting bound:

| cfg_interval | static stress bound (cycles) | at 1 GHz |
|---|---|---|
| 255  | 2.09 × 10^6 | 2.1 ms |
| 511  | 4.19 × 10^6 | 4.2 ms |
| 1023 | 8.38 × 10^6 | 8.4 ms |
| 2047 | 1.68 × 10^7 | 16.8 ms |

CPU traffic only delays a step by the cycles the CPU occupies. It does not
change the tick period, so the bound holds up to a few cycles. The scheme
costs no execution time. Its price is the extra logic (two 14-bit indexes, a
16-bit counter, a 32-bit latch, the XORs on the data paths) and two extra
memory accesses per interval. At an interval of 255, that is 0.8 % of the cycles.

## Top-level interface (`bti_flip_sram`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of the control logic (memory contents are not reset) |
| `mit_en` | in | 1 | run the flip counter |
| `cfg_interval` | in | 16 | cycles between word flips; 0 stops |
| `cpu_req`, `cpu_we` | in | 1 | access request; 1 = write, 0 = read |
| `cpu_addr` | in | 13 | word address |
| `cpu_be` | in | 4 | byte enables of a write |
| `cpu_wdata` | in | 32 | write data |
| `cpu_rdata`, `cpu_rvalid` | out | 32, 1 | read data, valid one cycle after the read |
| `start_idx`, `end_idx` | out | 14 | the inverted region |
| `step_done`, `pass_done`, `restart`, `overrun` | out | 1 | one-cycle event pulses |

Parameters: `WORDS` (8192), `DATA_W` (32) and `INTERVAL_W` (16). The shared
defaults and the `is_inverted()` region test are in `bti_flip_pkg`.

If `mit_en` is switched off in the middle of a pass, the memory stays correct
and simply keeps its current region. If it is switched on again, the pass continues.

## Modules

| file | role |
|---|---|
| `rtl/bti_flip_pkg.sv` | default sizes, `is_inverted()` |
| `rtl/bti_flip_sram.sv` | top: wires the four blocks |
| `rtl/flip_counter.sv` | interval timer producing `tick` |
| `rtl/flip_control.sv` | start/end indexes, read-latch-write sequencer, restart and tick queue |
| `rtl/flip_interface.sv` | CPU-priority port sharing, write/read polarity correction |
| `rtl/sram_array.sv` | synchronous single-port 8192 × 32 array with byte enables and a data-out register |

`sram_array` is a functional model of a complete SRAM macro. The
transistor-level parts of a real macro are not modelled separately: the 6T
cells, the address decoders, the write drivers, the latch-type sense
amplifiers and the timing circuit. Their ageing is what the scheme protects,
but it is an analog effect and has no place in RTL. In a chip, `sram_array`
would be replaced by the foundry macro, with the same pins.

## What is taken from the source and what is this design's own

Taken from the source description of the scheme:
- the four blocks (array, flipping interface, flipping control with its
  inverted-index bookkeeping, counter) and how they connect;
- the two-index walk over the memory;
- the read / flip / write step;
- the counter trigger, which is independent of CPU reads and writes;
- the rule that flips use only cycles the processor leaves free;
- the configurable interval;
- the 8192 × 32 memory.

Chosen here, where the source gives no detail:
- the CPU port protocol: request accepted at once, one-cycle read latency, `rvalid`, byte enables;
- the exact step length of 3 cycles (read, latch, write), of which 2 use the memory;
- restarting a step after a conflicting CPU write;
- the one-deep tick queue and the dropped-tick report;
- the 16-bit interval width, with 0 meaning "stopped";
- the asynchronous reset and the status outputs.

The source also describes a software alternative and compares against it. It is
not part of this hardware. In that alternative, an interrupt routine on the processor inverts a block of
words, optionally idles, and restores them.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_sram_array` | random byte-masked writes and reads against a reference array; read latency and hold |
| `tb_flip_counter` | tick spacing equals the interval (1 to 2047); no ticks when disabled or at interval 0 |
| `tb_flip_control` | 16 words. Each cycle, the stored array equals the true data complemented over the region; the indexes follow an independent model. Requires steps, passes, restarts, dropped ticks and waits for the CPU |
| `tb_flip_interface` | CPU priority, write correction, read correction with the polarity captured at the read |
| `tb_bti_flip_sram` | end to end at 64 words under random traffic. Every read is checked and the stored array is checked every cycle. Pass length is 2 × WORDS × interval. Every mechanism must occur |
| `tb_bti_flip_sram_intervals` | default size. One pass at each of the intervals 255, 511, 1023 and 2047, with background reads checked. The measured static stress is interval × 8192 cycles and matches 2.09e6, 4.19e6, 8.38e6 and 1.68e7 cycles (about 63 M cycles, roughly 35 s) |
| `tb_bti_flip_sram_duty` | 256 words, interval 8. Random program traffic in the lower half; data in the upper half is written once and never changed. Mixes of 20 % reads with 10 % writes and with 1.2 % writes. Over whole passes, every static cell has a duty factor of 0.5 within 1 %, and the longest static period is half a pass |
| `tb_bti_flip_sram_full` | default size, interval 255: one complete pass. Word 0 stays inverted for exactly 8192 × 255 cycles. The array is fully inverted halfway and true at the end. Sampled reads are correct |

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/bti_flip_pkg.sv tb/tb_bti_flip_sram.sv --top-module tb_bti_flip_sram
    ./obj_dir/Vtb_bti_flip_sram

The full-size pass is about 4.2 million cycles and runs in a few seconds.

## Limits

- Memory-usage overhead has also been reported for this scheme relative to
  the programs' own accesses: 101.6 %, 101 %, 100.5 % and 100.2 % at intervals
  255, 511, 1023 and 2047. That is roughly 4 accesses per interval. This
  implementation makes 2 accesses per interval (plus a repeated read after a
  restart), so its access overhead should be at or below those figures. This
  has not been checked against real program traces.
- A flip rate quoted per cell maps onto `cfg_interval` as
  `f_cell = f_clk / (2 × 8192 × cfg_interval)`. For example, a cell flipping at
  200 Hz with a 1 GHz clock needs an interval of about 305.

- The ageing benefit itself (noise margin, sense-amplifier offset) cannot be
  observed in RTL. The testbenches show the mechanism: the time each cell spends
  in each state, the duty factor and the static-stress bound.
- The stall-free claim relies on the processor leaving idle cycles. If the CPU
  accesses the memory in every cycle, flips wait indefinitely and ticks are dropped.
  `overrun` reports this.
- The region test needs two magnitude comparators on the CPU address path. For a
  timing-critical port, a registered or pipelined version would be needed.
