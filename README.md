# Built-in self-repair for a small SRAM, with the analyser's bitmap reused as spare bits

Embedded RAMs decide much of a chip's yield, so they carry spare rows and columns and a
built-in self-repair (BISR) circuit. This circuit tests the array, works out which spares to
use, switches them in, and stores the result in fuses. This design is such a BISR for an 8 x 8
bit-oriented SRAM (eight 8-bit words, one word per row) with one spare row and one spare column.

The central idea: a redundancy analyser needs a small cache-like store, the **local bitmap**.
During the test it holds the addresses of faulty cells. Once the test is over, the bitmap
is no longer needed for that, so its bit cells are kept on as a third kind of redundancy:
**spare bits**. Each spare bit replaces one RAM cell. So a few scattered single-cell faults can
be repaired without using up the spare row or column, and the spare row and column are left for
faults that really need them. The structure of the flow and of the
bitmap (row and column address registers with comparators, bit cells, repair-bit selection,
test and normal modes) follows the paper "FPGA Implementation of SRAM Memory Testing
Technique Using BISR Scheme". That paper does not give the allocation rules, the test
algorithm, encodings or timing, so those are this design's own, and are marked as such below
and in each file's header.

## Three kinds of redundancy

| resource | size (default) | what it replaces | where |
|---|---|---|---|
| spare row | 1 | one whole word (row), selected by RRA when RAE = 1 | `repairable_ram` |
| spare column | 1 | one bit position in every word, selected by CRA when CAE = 1 | `repairable_ram` |
| spare bits | `BM_K` x `BM_L` = 2 x 2 | the cell at (row entry i, column entry j) of the bitmap | `bira` |

The RAM repair is done by **multiplexers**, not by shifting. An access to row RRA goes to the
spare row, and bit CRA is written to and read from the spare column. Every other cell stays where
it is. This matters: the bitmap records fault addresses from the test of the *unrepaired* RAM.
Those addresses must still name the same cells once the spare row and column are in use.

## The test-and-repair flow (`bisr_ctrl`)

A one-clock pulse on `start` runs:

1. **Clear.** The analyser is emptied, and its empty signature is loaded into the repair
   registers, so the raw array is what gets tested.
2. **Test.** The BIST runs with the analyser in test mode (`MODE = 0`). Every faulty word is
   sent to the analyser. Then the flow waits until the analyser has handled the last report.
3. If the analyser still says *repairable* (`REP = 1`): **load**. The repair signature is
   loaded into the repair registers and the analyser switches to normal mode (`MODE = 1`).
   From here on, its bitmap cells act as spare bits.
4. **Pre-fuse test.** The BIST runs again, now on the repaired RAM.
5. If that passes: **program**. The fuse controller blows the signature into the e-fuse box
   and reads it back.

The flow ends with `done = 1` and exactly one outcome flag. `unrepairable` means it stopped
after step 2. `retest_fail` means it stopped after step 4. `repaired_ok` means it finished,
and the fuse read-back matched. While `busy = 1` the BIST owns the RAM and the functional port
is ignored.

After **every reset** the fuse controller copies the fuse box back into the fuse register (8
clocks). This restores the spare row and column and reloads the bitmap addresses into the
analyser. A part that has been programmed therefore comes up repaired without being tested
again. For a full self-repair at every power-up, set the top parameter `POR_START = 1`. The
flow then starts by itself as soon as the restore has finished after each reset. Fuses that
are already programmed are blown again with the same signature, which the read-back accepts.
With the default `POR_START = 0`, only a `start` pulse runs the flow.

Timing at the default size, fault-free: 49 clocks per BIST run and 16 clocks for programming plus read-back.
The whole flow takes about 125 clocks; each fault report adds one or more clocks.

## Redundancy analysis (`bira`)

This is the part that most needs explaining.

**Bitmap.** There are `BM_K` row entries (RAR, each with a valid bit) and `BM_L` column entries
(CAR, each with a valid bit), plus a `BM_K x BM_L` array of bit cells `b[i][j]`. The RAM is
bit-oriented, so a "column" is simply a bit position of the word. That is why one CAR per
column entry is enough, with no separate word/bit address.

**Test mode.** The BIST reports a faulty address `fa` and a syndrome `syn`. The syndrome is the
XOR of the expected word and the word read, so each set bit marks a faulty cell. The analyser's
controller takes one set bit per clock, lowest first. A report with n faulty bits therefore
keeps it busy for n clocks, and `flt_ready` stays low for that time. The BIST waits whenever it
has a new report and the analyser is still busy. Each faulty cell (r, c) is handled as follows:

1. If the spare row already holds r, or the spare column already holds c, nothing is done.
2. If r matches a row entry or a row entry is free, *and* c matches a column entry or a column
   entry is free, both entries are taken and `b[i][j]` is set.
3. Otherwise one of the two kinds of entry has overflowed:
   * row entries full: use the spare row for r. If it is already used, use the spare column for c.
   * column entries full: use the spare column for c. If it is already used, use the spare row for r.

   If the spare takes over a row or column that the bitmap was holding, that bitmap entry is
   freed, together with its bit cells.
4. If both spares are already in use, the RAM is unrepairable: `rep` drops to 0.

This is a greedy rule that works in a single pass. It is not an optimal search, and a different
reporting order could lead to a different verdict.

Worked example, the one the end-to-end test uses. The BIST reads addresses in the order 0, 1, 2,
5, 3, 7, 6, 4. The stuck-at-0 cells are: row 1 bits 0, 2, 4, 6; row 2 bit 2; row 5 bit 0; row 3 bit 4.

* row 1, bit 0 → row entry 0 = 1, column entry 0 = bit 0
* row 1, bit 2 → column entry 1 = bit 2
* row 1, bit 4 → column entries full → spare column = bit 4
* row 1, bit 6 → column entries full, spare column used → spare row = row 1; row entry 0 freed
* row 2, bit 2 → row entry 0 = 2, column entry 1 hit
* row 5, bit 0 → row entry 1 = 5, column entry 0 hit
* row 3, bit 4 → already covered by the spare column

The result is RRA = 1, CRA = 4, and the bitmap holds rows {2, 5} × bits {0, 2}.

**Normal mode.** The RAM's functional I/O passes through the analyser. On a write, every cell
`b[i][j]` whose row entry matches the address (RAH_i) and whose column entry is valid (CAH_j)
stores data bit CAR_j. On a read the same match is made. Those bits of the word come from the
bitmap, and the rest from the RAM. The match is registered together with `rd_en`, so the merged
word is ready in the same clock as the RAM's registered output. Every valid (row, column) pair
works as a spare bit. That includes pairs that never held a fault, which does no harm.

## Repair signature and fuses (`fuse_macro`, `efuse_box`)

The signature is 24 bits, kept in the first three words of an 8 x 8 fuse register:

| word | bits 7..0 |
|---|---|
| 0 | RAE, RRA[2:0], CAE, CRA[2:0] |
| 1 | row entry 1 {valid, addr[2:0]}, row entry 0 {valid, addr[2:0]} |
| 2 | column entry 1 {valid, bit[2:0]}, column entry 0 {valid, bit[2:0]} |

The fuse register is only a transport. One clock after it receives a signature (a load or the
end of a restore), word 0 is copied into the repair registers (`repair_regs`: RRA, RAE, CRA,
CAE). These come out as `row_address`/`row_en` and `col_address`/`col_en`. Two
`repair_decoder`s turn them into one-hot controls for the RAM's row and column multiplexers. Words 3 to 7 are not used by the repair. They can be read and written through
the `fuse_*` port, and they are programmed and restored along with the rest.

`efuse_box` is a **behavioural model** of a one-time-programmable e-fuse array. A fresh part reads
all zeros. Programming can only blow fuses, turning 0 into 1. Reset does not clear it. A real
design replaces it with the foundry's fuse macro. Because fuses cannot be un-blown, programming
a different signature over an older one fails the read-back, and `repaired_ok` stays 0.

## The RAM and fault injection (`repairable_ram`)

The physical array has 9 x 9 cells, the main 8 x 8 plus the spare row and the spare column. Reads
are synchronous: data appears one clock after `rd_en`. Writes and reads use separate
addresses. For simulation, `fault_en` makes the cells set in `fault_data` of physical row
`fault_addr` stuck-at-0. The spares are always fault-free. Reset clears the fault masks, so
injected faults must be injected again after a reset. The BIST's march
{⇑w 0x55; ⇑r 0x55; ⇑w 0xAA; ⇑r 0xAA} writes each cell as both 0 and 1, so it finds every
stuck-at fault. It finds stuck-at-0 cells at even bit positions in the first read pass and
those at odd positions in the second.

## Top-level ports (`bisr_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `reset` | in | 1 | clock; synchronous active-high reset, used as power-on reset |
| `start` | in | 1 | run the test-and-repair flow |
| `wr_en`, `write_address`, `wr_data` | in | 1, 3, 8 | functional write |
| `rd_en`, `read_address` | in | 1, 3 | functional read |
| `read_data` | out | 8 | read data, one clock after `rd_en`, spare bits merged |
| `fault_en`, `fault_addr`, `fault_data` | in | 1, 3, 8 | stuck-at-0 fault injection (simulation) |
| `row_address`, `row_en`, `col_address`, `col_en` | out | 3, 1, 3, 1 | repair registers RRA, RAE, CRA, CAE |
| `fuse_addr`, `fuse_wr_en`, `fuse_wr_data`, `fuse_rd_en`, `fuse_read_data` | in/out | 3, 1, 8, 1, 8 | direct access to the fuse register |
| `busy`, `done` | out | 1 | flow running / finished |
| `repaired_ok`, `unrepairable`, `retest_fail` | out | 1 | outcome of the last flow |

`start` is ignored until the fuse restore after reset has finished (8 clocks).

## Files

| file | contents |
|---|---|
| `rtl/bisr_pkg.sv` | sizes, the `repair_sig_t` signature type, its fuse-word packing functions, and the state enums |
| `rtl/bisr_top.sv` | top level: wiring and the mux that gives the RAM port to the BIST or to the user |
| `rtl/bisr_ctrl.sv` | flow sequencer |
| `rtl/bist.sv`, `rtl/bist_lfsr.sv` | march BIST; 3-bit LFSR address generator (x³+x²+1, extended with the all-zero state) |
| `rtl/bira.sv` | redundancy analyser, bitmap and spare bits |
| `rtl/fuse_macro.sv`, `rtl/efuse_box.sv` | fuse register and controller; e-fuse model |
| `rtl/repair_regs.sv`, `rtl/repair_decoder.sv`, `rtl/repairable_ram.sv` | repair registers; repair decoders; RAM with spares |
| `tb/tb_*.sv` | one self-checking testbench per module, plus four system-level ones |

Sizes: `ROWS` and `WIDTH` are parameters of the RAM-side modules. The bitmap size and the
signature layout come from the constants in `bisr_pkg` (`BM_K`, `BM_L`, `FUSE_WORDS`), because
the signature struct is declared there. To change the geometry, edit the package and keep
`SIG_WORDS` words of `WIDTH` bits large enough for the signature. The LFSR has taps for widths 2
to 8. The system-level tests have only been run at the default size.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/bisr_pkg.sv \
    tb/tb_bisr_top.sv --top-module tb_bisr_top
./obj_dir/Vtb_bisr_top
```

* `tb_bisr_top`, at the default size: a fault-free pass; an unrepairable case; a repair using
  the bitmap, the spare row and the spare column, followed by a random data test; a power cycle
  that restores the repair from the fuses; and a defect that appears after analysis and must fail
  the pre-fuse test. It counts how often each mechanism happens, and a mechanism that never
  happens counts as a failure. The mechanisms are: BIST stall, bitmap allocation, spare row
  after a row overflow, spare row after a column overflow, spare column, already-covered fault,
  unrepairable fault, reads served by spare bits, fuse programming, restore, and failed pre-fuse test.
* `tb_bisr_waveform_data` writes two sequences of words into a RAM with defects
  (26 129 9 99 13 241 101 and 1 13 118 61 237 140 249). The words read back wrong before the
  repair and correctly after it.
* `tb_bisr_random` runs 60 random defect patterns (0 to 6 stuck-at cells each) and compares
  the result with a reference model of the allocation rules written inside the testbench. It
  checks the verdict and the full signature. It also checks that every RAM called repairable
  passes the pre-fuse test and then reads back random data. A model of the one-way fuses predicts
  the outcome of each read-back.
* `tb_bisr_por` runs the power-on variant (`POR_START = 1`): the flow starts after each
  reset, with no `start` pulse.
* The unit testbenches check each block against values worked out by hand or against a simple
  reference model. This includes the cycle counts: 49 clocks per BIST run, 8 for the restore and
  17 for programming.

## Where this design departs from, or adds to, the paper

* **Re-BISR.** The paper's abstract describes one reconfigurable analyser shared by several
  RAMs of different sizes. It describes no mechanism for this, so this design has one RAM and one
  analyser.
* **Allocation rules.** The paper names a row/column/bit redundancy analysis but gives no rules.
  The rules above are this design's.
* **Own choices.** The following are all this design's: the march test and its data background;
  the LFSR polynomial; the report handshake; the bitmap size (2 x 2); the signature packing; the
  read-back check after programming; the stuck-at-0 fault model; the separate write address; and
  the abort flags.
* **Bitmap column address.** The paper's bitmap has a column address and a bit address per column
  entry. With one word per row the two coincide, so only one is kept.
* **Fuse model.** The e-fuse is a behavioural model.

## Size

After generic synthesis the top level has about 120 flip-flop bits and 285 memory bits. Of those,
153 are in the RAM model: 81 cells and 72 bits of fault-injection mask, which a real RAM would not
have. The rest are 64 fuses, 64 bits of fuse register and 4 spare bits; the 8 repair-register bits are flip-flops.
The logic is about 550 word-level cells. That fits easily in a small FPGA such as the Spartan-3E
XC3S500E that the paper reports using (4656 slices). The top has 73 pins, against the
device's 232 I/Os.
