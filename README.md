# MMLP: minimal maximum-level programming for 4-level Flash cells

Multi-level Flash cells are slow to program and slow to read, and the slowness grows with the
level number. To reach level 3 a cell needs about four times the program pulses that level 1
needs. Reading a cell that may be at any of four levels takes three reference comparisons, where
one suffices if the cell is known to be at 0 or 1.

Minimal maximum-level programming (MMLP) shares every cell of a wordline among several data pages.
The k-th page written into a wordline may use only the lowest k+1 levels. Early pages are then
written and read almost as fast as single-level cells, and only the last page needs the top
level. No capacity is lost: four 2-bit pages fill four 4-level cells (8 bits) exactly, with no
redundancy. The scheme needs four pieces of logic:

* an **address-to-cells mapping (ATC)**, which gives the cells a page occupies;
* an **encoder**, which turns new data plus the cells' present levels into new, never lower, levels;
* a **decoder**, which recovers a page from the sensed levels;
* a **MaxLevel table**, which records how high each wordline has been programmed, so that a read
  makes only as many reference comparisons as needed.

This repository holds synthesizable SystemVerilog for these four pieces and for a controller that
sequences writes, reads and erases through them. It also holds a cycle-level behavioural model of
the Flash cell array, with pulse counts and pulse/verify times taken from published measurements.

## How a wordline is shared

A wordline has four cells c1..c4 (cells 0..3 in the RTL) and holds four 2-bit pages. Page
addresses are 0..3 in the RTL.

| page (RTL address) | cells       | levels it may use | how it is stored                                  |
|--------------------|-------------|-------------------|---------------------------------------------------|
| 1st (0)            | c1, c2      | 0, 1              | one bit per cell, as is                            |
| 2nd (1)            | c3, c4      | 0, 1              | one bit per cell, as is                            |
| 3rd (2)            | c1..c4      | 0, 1, 2           | high bit on pair (c1,c2), low bit on pair (c3,c4)  |
| 4th (3)            | c1..c4      | 0 .. 3            | same pairs, with a second table                    |

Each cell carries one whole bit of page 1 or 2 and half a bit of each of pages 3 and 4. The
section on level errors below covers what a one-step level error does.

Wider pages repeat this 4-cell slice. With `SLICES = n` a page is 2n bits over 4n cells, and slice
s takes data bits `[2s+1:2s]`.

## The pair codes (the hard part)

Pages 3 and 4 add one bit to a pair of cells that already holds information. A data `0` leaves
the pair alone. A data `1` moves the pair to a state that no `0` could have left behind, using
only upward moves. Pair states are written as (first cell, second cell):

Page 3 (pair starts in {0,1}²; a `1` adds one level-2 cell):

| present | 00 | 01 | 10 | 11 |
|---------|----|----|----|----|
| bit = 1 | 12 | 02 | 20 | 21 |

Page 4 (pair starts in one of the eight page-3 states):

| present | 00 | 01 | 10 | 11 | 12 | 02 | 20 | 21 |
|---------|----|----|----|----|----|----|----|----|
| bit = 1 | 22 | 23 | 32 | 33 | 13 | 03 | 30 | 31 |

Each table is injective, and its outputs do not overlap its inputs. Decoding is therefore a fixed
walk backwards. If the pair is an output of the page-4 table, page 4's bit is 1 and the previous
state is the table's input; otherwise the bit is 0 and the state is unchanged. Then the same is
done with the page-3 table. What remains are the raw bits of pages 1 and 2. The decoder needs
neither MaxLevel nor the number of pages written. A page not yet written decodes as zeros.

Example: writing 01, 11, 01, 10 into an erased wordline gives levels 0100, 0111, 0121 and 2321.
Decoding 2321 returns all four pages.

The tables are functions in `mmlp_pkg`. `mmlp_encoder` and `mmlp_decoder` apply them per slice.

### Level errors

Flash errors are mostly one-step level drops from charge loss. Every cell serves only one pair,
so a drop in one cell can only corrupt the bits decoded from that pair. Pages 3 and 4 lose at
most one bit.

Pages 1 and 2 are different, because both of their bits come from the same pair. Once page 3 or 4
is written, a drop can move the pair into another valid state, and both bits of page 1 or 2 then
decode wrong. For example, (1,2) can drop to (1,1), so page 2 reads 11 instead of 00.

Over all data sequences and single-cell one-step drops, 128 of 6272 page reads come back with
both bits wrong. An ECC for these pages therefore has to cover 2-bit symbols per pair,
not single bits. No ECC is included here.

## Write, read and program-verify

`mmlp_controller` runs these sequences.

**Write** of page a into wordline w:
1. Look up w in the MaxLevel table. If a is not the wordline's next free address, the write is
   refused (`ST_ORDER`), because pages must be written in order.
2. For pages 3 and 4, read the present levels with MaxLevel reference comparisons: a cell's level
   is the number of references it reaches. Pages 1 and 2 go into erased cells and skip this step,
   as does any wordline whose MaxLevel is still 0.
3. The encoder gives the target levels. Cells of the page's cell set whose target is above their
   level are the ones to program.
4. Program-verify: one pulse on the cells still to program, then one comparison per distinct target
   level of this write, lowest first. A cell that reaches its target is inhibited. This repeats
   until no cell is left. After `MAX_PULSES` pulses the write gives up with `ST_PGM_FAIL`.
5. Store the new MaxLevel (the highest level actually written, so a wordline that kept its cells
   low stays fast to read) and the next free address.

**Read** of page a in wordline w makes MaxLevel comparisons (0 to 3) on the wordline, counts each
cell's level and decodes. **Erase** of w returns its cells to level 0 and clears its table entry.

### Timing model

The array model treats a cell as the number of pulses it has had since erase. Levels 1, 2 and 3
are reached at 10, 20 and 40 pulses. A pulse and a comparison each take 10 cycles, and one cycle
stands for 1 µs. The write costs that follow are, in µs:

| page | worst-case transitions        | cost                                  | µs  |
|------|-------------------------------|---------------------------------------|-----|
| 1, 2 | 0→1                           | 10 pulses × (pulse + 1 verify)         | 200 |
| 3    | 0→1, 0→2, 1→2                 | 1-comparison read + 20 × (pulse + 2 verifies) | 610 |
| 4    | 0→2, 1→3, 2→3                 | 2-comparison read + 30 × (pulse + 2 verifies) | 920 |

Their mean is 482.5 µs. Reads take 10, 20 or 30 µs as a wordline's MaxLevel goes 1, 2, 3. A
whole memory filled in page order therefore reads in 10 µs up to 50% occupancy, 20 µs up to 75%,
and 30 µs beyond.

In cycles, each array operation also costs one cycle of command hand-off:

* write = array µs + (number of array operations) + 3;
* read  = array µs + (number of comparisons) + 2.

The ATC, encoder, decoder and table are single-cycle logic, and their delay is negligible next to
a 10 µs pulse.

## Modules

| file | what it is |
|------|------------|
| `rtl/mmlp_pkg.sv` | types (`level_t`, `pair_t`, ops, array commands, status) and the pair tables |
| `rtl/mmlp_atc.sv` | address-to-cells mapping and per-page level limit; `LEVELS=4`, or `LEVELS=8` for the 8-level layout below |
| `rtl/mmlp_encoder.sv` | combinational encoder |
| `rtl/mmlp_decoder.sv` | combinational decoder |
| `rtl/mmlp_maxlevel_table.sv` | per-wordline MaxLevel and next address; flip-flops, combinational read, synchronous write |
| `rtl/mmlp_controller.sv` | write/read/erase sequencer with program-verify |
| `rtl/mlc_array_model.sv` | behavioural model of the Flash cell array (stands in for analog circuitry; written in synthesizable style) |
| `rtl/mmlp_top.sv` | everything wired together |

Host interface of `mmlp_top`:

* A request (`req_op` = `OP_READ`/`OP_WRITE`/`OP_ERASE`, `req_wl`, `req_addr`, `req_data`) is
  taken when `req_valid` and `req_ready` are both high. An assertion checks that a waiting request
  is held steady.
* One cycle of `resp_valid` ends the request. It comes with:
  * `resp_status`: `ST_OK`, `ST_ORDER` or `ST_PGM_FAIL`;
  * `resp_data`: the read data;
  * `resp_ncmp`: the comparisons of the read, or of the read before a write;
  * `resp_npulses`: the program pulses used.
* `rst_n` is an asynchronous active-low reset. The array model starts erased.

Array command interface (`mmlp_controller` ↔ `mlc_array_model`):

* `ACMD_PULSE` pulses the masked cells of a wordline.
* `ACMD_SENSE` compares the whole wordline against reference `cmd_ref`. `sense[i]` = cell i ≥ `cmd_ref`.
* `ACMD_ERASE` erases a wordline.
* A command is taken on `cmd_valid && cmd_ready`. `done` marks its last cycle.

### 8-level cells

`mmlp_atc` with `LEVELS=8` gives the 8-level layout, with 8 cells and 12 pages per slice:
* pages 1–4 each use one pair of cells, with levels 0–1;
* pages 5/6, then 7/8, use the first or second half of the cells, with levels up to 2, then up to 3;
* pages 9–12 use all cells, with level limits 4, 5, 6 and 7.

Counting states shows that codes for this layout exist. The codes themselves are not specified,
so no 8-level encoder or decoder is provided, and the rest of the design is 4-level only.

## Design choices beyond the scheme

* **MaxLevel** is stored as the highest level index, and a read makes that many comparisons: one
  for a wordline holding only pages 1–2, two after page 3, three after page 4. It is the level
  actually reached, so it can be below the page's allowed limit.
* **Pre-read** is skipped for pages 1 and 2, which go into erased cells.
* **Verify** compares against every target level of the write after every pulse. This reproduces
  the (pulse + 2 verify) cost of pages 3 and 4. Dropping levels whose cells are all done would be
  faster but is not done.
* **In-order writes** are enforced with a next-address field per wordline, instead of being
  assumed.
* **Pulse limit** and failure status, `MAX_PULSES = 64`.
* **Erase** works per wordline, with a time of 100 cycles. A real device erases blocks of many
  wordlines.
* **Size:** `NUM_WL = 8` wordlines and a 2-bit page (`SLICES = 1`) are defaults chosen for
  simulation. Real pages are kilobytes, and `SLICES` scales to that.
* **Array model:** no disturb and no charge loss. Cell-to-cell variation is optional: with
  `VAR_PULSES = v`, cell c of wordline w needs (7w + 3c) mod (v+1) extra pulses for every level.
  It is off by default, so the timing above holds exactly. With it on, program-verify still puts
  every cell on its target, and writes just take more pulses.

Not included:
* ECC for the last page of a wordline;
* the logical-to-physical page mapping of a Flash translation layer (the host gives wordline and
  page address directly);
* an 8-level encoder/decoder;
* the Multipage and conventional programming schemes MMLP is compared with.

## Verification

Each module has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`.

* `tb_mmlp_encoder`, `tb_mmlp_decoder`: all 256 four-page sequences against an independent table
  model, plus two-slice random sequences and the worked example. The decoder testbench also
  decodes every single-cell one-step drop and checks the 128-of-6272 count above.
* `tb_mmlp_atc`: 4-level (one and two slices) and 8-level maps.
* `tb_mmlp_maxlevel_table`, `tb_mlc_array_model`: storage, pulse thresholds, command timing.
* `tb_mmlp_controller`: the 200/200/610/920 µs page writes, read times, comparison counts, refused
  writes, erase.
* `tb_mmlp_top`: random end-to-end traffic with read-back after every write, and times checked
  against the timing model (`tb/tb_mmlp_ref_pkg.sv`). Every mechanism must occur at least once:
  * pre-read skipped, and pre-reads of 1 and 2 comparisons;
  * two-level verify;
  * a write with nothing to program;
  * reads with 0–3 comparisons;
  * a refused write, an erase, and a program failure (from a second instance with a 5-pulse limit);
  * writes stretched by cell variation (a third instance with `VAR_PULSES = 5`, whose data must
    still read back).
* `tb_mmlp_wide`: 8-bit pages (`SLICES = 4`) end to end. A write costs the worst slice's pulses
  and verifies every target level present in any slice.
* `tb_mmlp_full`: the default-size design filled in page order to 25/50/75/100% occupancy. It
  checks data, write times, and 10/20/30 µs reads.

Running one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_mmlp_full rtl/mmlp_pkg.sv tb/tb_mmlp_ref_pkg.sv tb/tb_mmlp_full.sv -o sim
./obj_dir/sim
```

For the other testbenches, change the top module and file. `tb_mmlp_ref_pkg.sv` is needed only
by `tb_mmlp_top`, `tb_mmlp_wide` and `tb_mmlp_full`. Every testbench finishes in well under a second.

Lint: `verilator --lint-only -Wall -Irtl rtl/mmlp_pkg.sv rtl/mmlp_top.sv`. The one remaining
warning (SYNCASYNCNET) comes from the host-handshake assertion: its `disable iff` samples the
asynchronous reset.

## Changing it

* **Pulse counts and times:** `NP01/NP02/NP03` and `T_PULSE/T_VFY/T_ERASE` on `mmlp_top`. The
  cycle formulas above still hold. `VAR_PULSES` spreads the cells' pulse needs.
* **Wider pages:** `SLICES`. The testbenches check one and two slices at block level, and four
  slices end to end.
* **More wordlines:** `NUM_WL`. The table is flip-flops; a large table would move to a RAM.
* **Replacing the model with a real array interface:** keep the command handshake of
  `mlc_array_model`. The controller relies only on the `done` cycle and on `sense` being valid
  then.
