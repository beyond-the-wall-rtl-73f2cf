# JAFAR: a select filter that lives on the memory module

In an in-memory column store, a selection such as
`SELECT ... WHERE 250000 <= price <= 750000` normally drags the whole column
through the memory bus and the cache hierarchy just so the CPU can throw most
of it away. JAFAR ("Just A Filtering Accelerator on Relations") moves the
filter next to the DRAM chips instead. It sits on the DIMM, reads the column
from the rank the way a memory controller would, compares every 64-bit value
as it comes out of the DRAM IO buffer, and writes back only a bitset with one
bit per row. The CPU later reads that bitset: 1 bit per row crosses the bus
instead of 64.

This repository holds synthesizable SystemVerilog for the accelerator and for
the DIMM-side logic around it: the memory access arbiter that shares the rank
between host and accelerator, and the IO buffer. It also has a behavioural
clock doubler and self-checking testbenches, including one that runs a
4-million-row column end to end. The DRAM arrays themselves and the host CPU
are not part of the RTL. The top level exposes their signals as ports, and
the testbenches supply models for them.

## System view

```
            host CPU (testbench)                      DRAM arrays (testbench model)
   register bus |   memory requests | 64-bit data         ^ PRE/ACT/RD/WR    | 512-bit burst
                v                   v      ^               |                  v
   +------------+--------- jafar_top -----+---------------+------------------+-----+
   |            |           +-------------+--------+      |            +-----------+ |
   |            |           |  jafar_mem_arbiter   |------+            | io_buffer | |
   |            |           |  ownership, RAS/CAS, |<-- owner tag -----| 512 -> 8x | |
   |            |           |  DDR3 timing         |                   |  64 bit   | |
   |            |           +----------^-----------+                   +-----+-----+ |
   |            |                      | requests             words (JAFAR's)|       |
   |     +------v----------------------+-------------------------------------v----+  |
   |     | jafar_core: ctrl_regs -> controller -> datapath (latch, 2 ALUs, bitset)|  |
   |     +------------------------------------------------------------------------+  |
   |   jafar_clkgen: bus_clk x2 -> jafar_clk (clocks everything above)               |
   +---------------------------------------------------------------------------------+
```

Everything synchronous runs on `jafar_clk`, which is twice the DDR3 data-bus
clock (2 GHz for a 1 GHz bus). DDR3 moves two 64-bit words per bus clock, one
on each edge. At the doubled clock that becomes one word per `jafar_clk`
cycle, so the datapath needs no dual-edge logic.

## The filter datapath (`jafar_datapath`)

```
 row from IO buffer --> [data latch] --+--> ALU left  (value OP_L left_val ) --+
                                        |                                       AND --> write enable
                                        +--> ALU right (value OP_R right_val) --+          |
 page offset counter --> one-hot bit position ------------------------------------> [output bitset]
                                                                                        |
                                                    full (64 rows) or final row --> [write-back reg]
```

* **Stage 0:** the data latch registers the incoming word.
* **Stage 1:** both ALUs compare the latched value with their operands.
  Each ALU supports `=`, `<`, `>`, `<=`, `>=` on signed 64-bit integers, plus
  `OP_ANY` (always true), which idles one ALU for a one-sided predicate.
  A row passes when both ALUs say true. A range filter uses `GE range_low`
  on the left ALU and `LE range_high` on the right.
* **Bit position:** the page offset counter tracks the row number. Its low
  6 bits select a bit of the 64-bit output bitset. If the row passes, that
  bit is set.
* **Write-back register:** when the row that completes a bitset word (the
  64th row, without interleaving) or the final row of the call has been
  processed, the bitset moves into the write-back register in the
  same clock and the bitset starts again empty. The filter therefore never
  waits for a write to DRAM. A second full bitset arriving while the first is
  still waiting would be lost; this sets the sticky `overflow` status bit.
  Because writes are issued ahead of reads, this cannot happen in normal use.
* **Valid-row mask:** with the bitset goes a mask of the rows actually
  filtered. A write changes only those bits, so a partly filled last word
  keeps the bits of other rows. Several calls, or several modules, can
  therefore share one bitset word.
* **Timing:** one row per clock. The bit for a row is in the write-back
  register two clocks after the row enters the latch.

### Interleaved columns

A system with several memory channels can interleave the address space
between modules in 64-bit steps. With two modules, one of them holds rows 0,
2, 4, … of a column and the other holds rows 1, 3, 5, …. The accelerator on
each module filters the words it holds as usual. Each word is still one
complete row. Only the bookkeeping of bit positions changes:

* The page offset counter maps local row `k` to column row
  `(k << shift) | phase`. The register field `shift` is log2 of the number of
  interleaved modules (1, 2, 4 or 8). `phase` is this module's position in
  the stride.
* The bit position and the bitset word index come from the column row, so
  every module writes its bits where they belong in one shared bitset.
* A word is written back after the module's last row in it, which is every
  `64 >> shift` rows. Its mask covers only the module's own bits, so the
  modules' masked writes merge without reading the word first.

The host programs each module's accelerator with its local column address,
its own row count and the same bitset address. A non-interleaved column is
`shift = 0`, `phase = 0`, the reset value. `tb_jafar_top` runs two such calls
on one simulated module, one for each phase, and checks the merged bitset.
The simulation does not cover the host-side address translation of a real
multi-channel system.

## One select call (`jafar_controller`, `jafar_ctrl_regs`)

The host drives the accelerator through memory-mapped 64-bit registers. The
map is in `jafar_pkg`:

| index | name       | contents                                             |
|-------|------------|------------------------------------------------------|
| 0     | CTRL       | write bit 0 = 1 to start                              |
| 1     | STATUS     | bit 0 busy, bit 1 done (sticky until next start), bit 2 overflow |
| 2     | COL_ADDR   | byte address of the first row, 64-byte aligned        |
| 3     | NUM_ROWS   | rows to filter (512 for one 4 KB page)               |
| 4     | LEFT_VAL   | left ALU operand (`range_low`)                        |
| 5     | RIGHT_VAL  | right ALU operand (`range_high`)                      |
| 6     | OPCODES    | [2:0] left opcode, [10:8] right opcode (`cmp_op_e`)  |
| 7     | OUT_ADDR   | byte address of the output bitset                     |
| 8     | DONE_ADDR  | byte address of the completion word                   |
| 9     | INTERLEAVE | [1:0] log2 of the interleave stride, [6:4] phase      |

Register writes are ignored while a call is running.

The intended host software handles one virtual-memory page per call, because
only the host can translate virtual addresses:

1. Pin the page, translate it, and write the registers.
2. Hand the rank to the accelerator (`jafar_owns_rank = 1`).
3. Start the call.

The controller then works as follows:

* It reads the column in aligned 64-byte bursts of eight rows. It keeps up
  to two reads in flight (`MAX_RD`), so the next read goes out while the
  previous burst is still in the DRAM. With a single read in flight, every
  burst would pay the full read latency plus the streaming time, about 34
  clocks or more. With two, a column streams at the CAS command rate the
  DRAM allows: one burst every 26 clocks.
* It forwards the first `NUM_ROWS` words to the datapath and drops the rest
  of the last burst.
* Whenever a full bitset is waiting, it sends a masked 64-bit write to
  `OUT_ADDR + 8*k` for bitset word `k`, ahead of the next read.
* After the bitset that holds the final row, it writes `1` to `DONE_ADDR`.
  That is the word the host polls. `STATUS.done` reports the same event.

The number of clocks a call takes does not depend on how many rows pass.
Every bitset is written whether it holds ones or not, and nothing in the
datapath waits on the data. The testbenches check this.

## Sharing the rank (`jafar_mem_arbiter`)

Host and accelerator cannot both drive one DDR3 rank. The design hands the
rank over wholesale. A DDR3 host can lock its own memory controller out of
ordinary reads and writes, for example by enabling the MR3 multipurpose
register. `jafar_owns_rank` represents that state:

* While it is high, only accelerator requests are taken.
* While it is low, only host requests are taken.

The other side simply sees `ready` low.

The arbiter decodes a byte address as `| row (15) | bank (3) | column (10) | byte (3) |`,
so a DRAM row is 8 KB (1024 words) and a 4 KB page is half a row. It keeps
one open row per bank (open-row policy) and issues:

* **Row hit:** only `RD`/`WR` (the CAS command).
* **Other row open:** `PRE`, then `ACT` after tRP, then CAS after tRCD.
* **Bank closed:** `ACT` (the RAS command), then CAS after tRCD.

A `PRE` also waits until tRAS has passed since that bank's `ACT`. CAS
commands are at least `T_CCD` = 26 clocks (13 ns) apart. A read's data comes
back from the arrays CL clocks after `RD`. A small
FIFO of owner tags then steers the eight words from the IO buffer to the host
port or to the accelerator.

| parameter | default (JAFAR clocks) | meaning |
|-----------|------------------------|---------|
| `T_RCD`   | 26 (13 ns)             | ACT to CAS |
| `T_RP`    | 26 (13 ns)             | PRE to ACT |
| `T_RAS`   | 70 (35 ns)             | ACT to PRE |
| `T_CCD`   | 26 (13 ns)             | CAS to CAS |

CL, also 26 clocks (13 ns), is applied by the DRAM side. The testbench DRAM
model uses it and checks all of these rules on every command.

Writes here are single 64-bit words with a bit mask. A real DDR3 device
writes whole bursts with byte masks, so a real module would need a
read-modify-write step for bit-granular writes. Refresh is not modelled.

## Measured behaviour

These numbers come from the testbenches at default parameters: 1 GHz bus,
2 GHz accelerator clock, the timing values above, and two reads in flight.

* **Steady streaming:** within an open row, consecutive reads go out exactly
  26 clocks apart. Each burst keeps the filter busy for 8 of those clocks, so
  about 70 % of the accelerator's time is spent waiting for data.
* **Lower bound per page:** a 4 KB page (512 rows) is 64 bursts, so it
  cannot take less than 64 × 26 = 1,664 clocks.
* **Bitset in another bank:** the nine writes per page (eight bitset words
  and the completion word) each take a CAS slot, which gives about 1,900
  clocks per page. A 300-row call takes about 1,140 clocks.
* **Bitset in the column's bank:** each bitset write closes the column's row
  and reopens it, and a page takes about 2,660 clocks.
* **4 M-row run:** the whole column averages 2,028 clocks per page, between
  1,899 and 2,783. That is 0.25 rows per clock, or about 0.5 rows/ns.
* **Selectivity:** from 0 % to 100 % in 10 % steps, the run time of each
  page is identical to the clock.

## Files

| file | role |
|------|------|
| `rtl/jafar_pkg.sv` | widths, opcodes, request and configuration structs, register map |
| `rtl/jafar_alu.sv` | one predicate comparator |
| `rtl/jafar_data_latch.sv` | input register of the datapath |
| `rtl/jafar_page_offset_counter.sv` | row counter, interleave mapping, one-hot bit position, bitset index |
| `rtl/jafar_output_buffer.sv` | 64-bit bitset, valid mask, write-back register |
| `rtl/jafar_datapath.sv` | the filter pipeline |
| `rtl/jafar_ctrl_regs.sv` | memory-mapped registers |
| `rtl/jafar_controller.sv` | read/write sequencer of a call |
| `rtl/jafar_core.sv` | the accelerator: registers + controller + datapath |
| `rtl/jafar_mem_arbiter.sv` | rank ownership, DRAM command generation and timing |
| `rtl/jafar_io_buffer.sv` | 512-bit burst to 64-bit words |
| `rtl/jafar_clkgen.sv` | clock doubler, **behavioural model only** (a PLL/DLL in silicon) |
| `rtl/jafar_top.sv` | the module-side system |
| `tb/dram_array_model.sv` | sparse DRAM rank model with timing-rule checks (testbench only) |
| `tb/mem_responder_model.sv` | simple memory for testing the core alone |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the workload run |

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_jafar_top` takes the full system through nine calls and checks each
  bitset word against a software filter. It covers:
  * a host read and write
  * a range filter and an equality filter
  * a partial last word
  * 0 % and 100 % selectivity
  * two interleaved halves of a column merged into one bitset

  It also checks that every mechanism occurs at least once:
  * host held off, and accelerator held off
  * row hit, row miss, and activate
  * full and partial write-back
  * the completion write
  * two reads in flight, and reads at the CAS-to-CAS spacing
  * a merged interleaved bitset word

  Finally, it bounds the streaming rate.
* `tb_jafar_workload_select` filters 4,194,304 uniformly distributed integers
  (0..999,999) page by page, about 21 M clocks (around 15 s of simulation).
  It also runs a selectivity sweep.

## Simulating

With Verilator 5 (the package must come first):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/jafar_pkg.sv tb/tb_jafar_top.sv --top-module tb_jafar_top -Mdir obj_top
./obj_top/Vtb_jafar_top
```

Replace `tb_jafar_top` with any other testbench name. The top-level
testbenches drive a 1000-unit bus clock period. With Verilator's default 1 ps
time unit, that is 1 GHz, matching the clock generator's default
`CLK_HIGH_TIME = 250`. For a different bus period, change both.

Lint a module on its own with `verilator --lint-only -Wall -Irtl -y rtl rtl/jafar_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are about unused bits: the address fields each
function ignores, and the configuration fields a module does not need.

## How far it can be trusted

What has been checked:

* Every module has its own self-checking testbench, and the full system has
  two more. All bitsets are compared bit for bit with a software model of
  the same filter.
* The DRAM model checks every command against the timing rules above.
* The RTL compiles without errors with Verilator and with a second SystemVerilog
  front end. Lint reports no latches, loops or multiple drivers; its only
  warnings are about unused bits.

What has not been checked:

* Simulation used a two-state simulator only.
* Nothing was run on a gate-level netlist or in hardware, and no synthesis
  for timing was done. Whether the datapath closes timing at 2 GHz is open.
  The critical path is the 64-bit compare feeding the bitset.
* The DRAM side is simplified:
  * no refresh
  * no write-to-read or read-to-write turnaround
  * no tWR
  * no per-rank power states
  * bit-masked single-word writes
* The host side is a testbench, and the register bus is a plain synchronous
  port in the accelerator's clock domain. A real module would need clock
  domain crossing to the host's memory bus.

## How far this follows the original design, and where it departs

These parts follow the published description of the design:

* the split into data latch, two parallel ALUs, page offset counter, output
  bitset and clock generator
* the five predicates on 64-bit integers, and the range filter as two
  compares
* one row per accelerator clock at twice the bus clock
* 512-bit bursts streamed as 64-bit words
* periodic bitset write-back to a programmed address, without stalling
* completion by a polled memory word
* control through memory-mapped registers
* one call per page
* rank ownership by the accelerator
* masked bitset writes that touch only a module's own rows under interleaving
* row-buffer behaviour and the four DDR3 timing parameters

The description leaves the following open, so these are this
implementation's choices:

* the bitset size (64 rows)
* the interleave encoding (power-of-two strides up to 8)
* the register map and register bus
* signed comparison and the extra `OP_ANY` code
* the valid/ready handshakes and the request struct
* two reads in flight
* write-before-read priority and the overflow flag
* the completion value (1)
* the address map and 8 banks
* the values of tRCD, tRP and tRAS (typical DDR3)
* the single-word bit-masked write
* a single clock domain for the host-facing ports
* synchronous active-low reset

The description gives two meanings for CL: the minimum gap between CAS
commands, and a ~13 ns access latency. Both are used here with the same
value of 26 clocks. `T_CCD` in the arbiter spaces the CAS commands, and the
DRAM side returns read data CL clocks after `RD`. Real DDR3 parts allow CAS
commands closer together (one burst, 4 bus clocks) than their CAS latency.
To model such a part:

* Set `T_CCD = 8` in the arbiter and in the testbench DRAM model, and set
  `MAX_RD = 4`.
* The 4 M-row run then reaches 0.62 rows per clock, and all data and timing
  checks still pass.
* Only the rate checks of `tb_jafar_top` and `tb_jafar_workload_select` fail.
  They are written for the 26-clock spacing.

Not built:

* **DRAM storage and host CPU.** Only models in `tb/`.
* **Mode-register handover.** The mechanism that hands the rank over
  (setting MR3) is reduced to the `jafar_owns_rank` input.
* **Idle-period sharing.** Running the accelerator in the host's idle
  periods without a scheduler is not supported: a requester without
  ownership simply waits.
* **Shuffled layouts.** The other way to handle interleaving is for the
  storage engine to reorder the column so that it is contiguous on each
  module. That is a software matter; the hardware needs nothing for it.
* **Other operators.** Aggregation, projection, sorting, hashing and
  row-store filtering are discussed only as possible extensions and are not
  implemented.
