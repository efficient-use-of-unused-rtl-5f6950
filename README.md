# SEC-DED memory that reuses unused repair spares as extra check bits

Embedded memories carry spare columns so that production test can replace
defective bit lines. Most parts leave some of those spares unused. This design
puts the leftovers to work: every spare column that repair did not take stores
one more check bit of the error-correcting code. Each extra check bit adds a
row to the parity-check matrix H, and the extra rows expose many of the
triple-bit errors that a plain single-error-correcting, double-error-detecting
(SEC-DED) Hsiao code would silently "correct" into wrong data.

The RTL holds a 16-bit data word, a (22,16) Hsiao code (6 check bits), and
three spare columns. A fuse block decides for each spare, after production
repair, whether it replaces a faulty column or holds an extra check bit. With
all three spares free, the share of triple errors that end up miscorrected
falls from 65.5 % to 3.1 %.

## The code

Codeword bits are numbered: data 0..15, base check bits 16..21, extra check
bits 22..24 (one per spare). The parity-check matrix has 6 base rows and 3
spare rows. The data part is given in `rtl/secded_pkg.sv` (`H_DATA`):

| row | data columns 0..15 | role |
|-----|--------------------|------|
| 0 | `1111110000100010` | base |
| 1 | `1110001111001000` | base |
| 2 | `1000101110000111` | base |
| 3 | `0000011001110111` | base |
| 4 | `0101000101111100` | base |
| 5 | `0011110010011001` | base |
| 6 | `1100100101100011` | spare 1 |
| 7 | `0001111110000100` | spare 2 |
| 8 | `1111001000010011` | spare 3 |

Every data column has weight three in the base rows and all are distinct, so
the base code alone is a Hsiao SEC-DED code. Check bit *r* has the unit column
of row *r*; base check columns are zero in the spare rows.

**How the spare rows were chosen.** Searching all 2^16 patterns for a spare row
is possible at 16 bits but not at 64, and it says nothing about gate count.
Each spare row is filled in two stages. Spare 1 is filled first, then spare 2
given spare 1, then spare 3.

1. *Chunk selection.* The row is made of whole *chunks*: groups of three
   adjacent columns in which several base rows already share a run of ones
   (columns 0-2, 3-5, 6-8, 9-11 and 13-15; column 12 is left at 0). That gives
   only 2^5 candidates. The one with the fewest miscorrected triple errors is
   kept.
2. *Boundary refinement.* Miscorrection depends only on the set of columns,
   not on their order. So the chunks may be put in any order; here they are
   taken as 0-2, 3-5, 13-15, 9-11, 6-8, 12. The two columns that meet at each
   chunk boundary may be kept, set to 00 or set to 11, which gives 3^5
   candidates. The candidate with the fewest miscorrected triples is kept, but
   only if the shared XOR network (below) does not grow beyond its stage-1
   size.

Building the rows from runs the base rows already compute keeps the spare
rows cheap in a shared XOR network.

**Triple-error miscorrection.** A triple error is miscorrected when its
syndrome equals some column of H. Counting over all triples of codeword bits:

| spares holding check bits | codeword bits | triples miscorrected | published (16 bits) |
|---|---|---|---|
| 0 | 22 | 1008 of 1540 (65.5 %) | – |
| 1 | 23 | 456 of 1771 (25.7 %) | 26.9 % |
| 2 | 24 | 196 of 2024 (9.7 %) | 10.0 % |
| 3 | 25 | 72 of 2300 (3.1 %) | 4.7 % |

`tb/tb_correction_logic.sv` checks these counts exhaustively against the RTL.
Chunk selection alone gives 26.9 / 10.9 / 5.4 %.

## Which spares are in the code: fuses and the EN signal

Each spare has a fuse box (`rtl/fuse_box.sv`) with three things in it:

* a USED flag fuse: the spare repairs a normal column;
* a BAD fuse: the spare column is itself defective;
* a 5-bit address: the normal column (0..21) that the spare replaces.

Its output EN (called FA1..FA3 at the top level, port `fa`) is USED or BAD. EN
= 0 means the spare is free and holds an extra check bit. EN = 1 means it
does not. The fuse latch (`rtl/fuse_cell.sv`) is a behavioural model of a
fuse-to-VDD sense node with a FUSE_CTRL pull-down, an inverter and a keeper.
After a `fuse_ctrl` pulse, EN is 1 if the fuse is blown and 0 if it is intact.

Repair should take spares from the top down: spare 3 first, then 2, then 1. The
free spares are then always the low rows of H. The logic does not enforce this
order. It works with any pattern, but the miscorrection numbers above assume
it.

EN does three jobs:

1. **Write multiplexer** (`spare_wmux`). Each spare's input has a 2:1 MUX. EN =
   0 writes the extra check bit. EN = 1 writes the bit of the column the spare
   repairs. Only the three spare inputs are multiplexed. The normal columns are
   written directly.
2. **Syndrome gating** (`error_detect`). The extra syndrome bit of a spare is
   ANDed with NOT EN. A spare that holds data then contributes nothing.
   *Error detected* is the OR of all gated syndrome bits.
3. **Decoding** (`correction_logic`). Only the rows of free spares take part
   in matching columns.

Repair itself is steered inside the array. `redundancy_sig_gen` compares every
column index with the fused address and produces a one-hot "replaced column"
vector per spare. `normal_line_interrupt` ORs these vectors into a mask of
disabled normal columns. `column_control` routes the spare's value into the
read word at the repaired position and blocks writes to the faulty column. So
the syndrome generator always sees the 22 normal bits in order, plus the three
raw spare bits.

## Data flow

```
wdata ─► check_bit_gen ─┬─ base checks ─────────────────► normal columns ┐
                        └─ extra checks ─► spare_wmux ──► spare columns  │ spare_memory
             block_a (fuses) ─ EN, repl, intr ─┘            column_control
read:  normal word (repaired, in order) + raw spares ─► syndrome_gen
       ─► error_detect (AND with ~EN, OR) ─► correction_logic ─► rdata, flags
```

## The shared XOR network

The check bit generator and the syndrome generator both compute `H_DATA ·
data`. Both use `xor_share_net`, which builds the nine parity equations from
shared subterms rather than nine separate XOR trees. The structure is worked
out when the design is elaborated, by a constant function (`build_net`):

1. Start with the rows of the matrix, one per equation.
2. AND every pair of rows. The result is the set of inputs that two equations
   have in common.
3. Remove duplicates and results with fewer than two ones. What remains is the
   next level. Repeat from step 2 on this level, until a level has at most one
   row.
4. Every row of every level is a candidate shared term. Sort the candidates by
   weight. Build each one as the XOR of the largest smaller candidates it
   contains (chosen greedily, without overlap), plus its remaining single
   inputs.
5. Build each output the same way from the candidates. Drop candidates that no
   output uses.

The hardware is just the resulting network of XORs. Its size for the default
matrix, in two-input XOR gates:

| rows used | shared network | separate trees | published (16 bits) |
|---|---|---|---|
| 6 (no spare) | 36 | 42 | – |
| 7 (1 spare) | 40 | 49 | 41 |
| 8 (2 spares) | 45 | 55 | 43 |
| 9 (3 spares) | 49 | 62 | 45 |

The parameters `MAXT`, `LVL_CAP` and `MAX_LVL` limit how many candidates are
examined, which keeps elaboration quick. Lowering them can only reduce the
sharing. The outputs stay correct. A synthesis tool may restructure the network
further.

## Wider words

Nothing in the RTL is tied to 16 bits. `K`, `R`, `S` and `H` are parameters,
and the XOR network, the decoder and the fuse address width follow them.
`tb_ecc_spare_mem_wide` supplies two wider codes:

* 32 bits: a (39,32) Hsiao code with 7 base rows. It uses 32 of the 35
  weight-3 columns, chosen so that every row has weight 13 or 14.
* 64 bits: a (72,64) Hsiao code with 8 base rows. It uses all 56 weight-3
  columns plus 8 weight-5 columns, and every row has weight 26.

In both, the columns are sorted by value, so that base rows share long runs
of ones. Spare rows come from chunk selection only: chunks of 3 columns at 32
bits (2^10 choices) and of 4 columns at 64 bits (2^16 choices). Boundary
refinement was not applied at these widths.

| data bits | 1 spare | 2 spares | 3 spares | XORs, shared (1/2/3 spares) | XORs, separate trees |
|---|---|---|---|---|---|
| 32 | 26.2 % | 11.6 % | 5.1 % | 90 / 98 / 107 | 106 / 117 / 128 |
| 64 | 26.5 % | 12.5 % | 6.2 % | 194 / 232 / 254 | 231 / 262 / 289 |

The miscorrection figures are measured through the memory by the testbench.
The gate counts follow from the sharing rules above. At 64 bits the default
caps limit how much is shared. With `MAXT` = 96 and `LVL_CAP` = 64, the counts
become 185 / 221 / 244. The greedy cover does not always gain from more
candidates: with no spare rows, the network grows from 174 to 180 gates. The published chunk-selection results are 23.8 / 10.7 /
4.7 % at 32 bits and 26.5 / 12.6 / 6.3 % at 64 bits.

## Top level: `ecc_spare_mem`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (clears `rvalid` only) |
| `fuse_ctrl` | in | 1 | fuse sense pulse; pulse once after power-up and after programming |
| `prog` | in | S | per-spare programming strobe (rising edge blows the selected fuses) |
| `prog_used`, `prog_bad` | in | S | blow the USED / BAD fuse of that spare |
| `prog_addr` | in | S×5 | repair column address to blow |
| `fa` | out | S | EN per spare: 1 = used for repair or defective |
| `we`, `re` | in | 1 | write / read |
| `addr` | in | 10 | word address |
| `wdata` | in | 16 | write data |
| `rvalid` | out | 1 | 1 in the cycle after a read |
| `rdata` | out | 16 | corrected read data (valid with `rvalid`) |
| `err_detected` | out | 1 | gated syndrome non-zero |
| `corrected` | out | 1 | a single error was located (and fixed if in a data bit) |
| `uncorrectable` | out | 1 | error detected but no column matches (double, or an unmasked triple error) |

Timing: a write stores `wdata` at `addr` on the rising clock edge. A read
samples `addr` on a rising edge. The word, its correction and its flags are
available after that edge, with `rvalid` high for one cycle. The encode and
decode paths are combinational around the array.

Parameters: `K` (16), `R` (6), `S` (3), `H` (the matrix above), `DEPTH`
(1024). `K`, `R`, `S` and `H` must be changed together. The default RTL ships
only the 16-bit matrix.

## Files

`rtl/`: `secded_pkg` (sizes, H), `xor_share_net`, `check_bit_gen`,
`syndrome_gen`, `error_detect`, `correction_logic`, `spare_wmux`, `fuse_cell`
(behavioural), `fuse_box`, `redundancy_sig_gen`, `normal_line_interrupt`,
`block_a` (fuse boxes + redundancy signals + interruption), `column_control`,
`spare_memory`, `ecc_spare_mem` (top).

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), each ending
with a `TB_RESULT checks=… failures=…` line.

* `tb_ecc_spare_mem` runs the top at its default size through four fuse
  states. First all spares are free. Then spare 3 repairs data column 7, which
  the testbench makes defective. Then spare 2 is marked bad. Finally spare 1
  repairs check column 18. In each state it writes and reads back all 1024
  words. It then injects single, double and triple errors directly into the
  array cells and checks correction, detection and read latency. It also counts
  that each mechanism occurred: extra check bits in use, repair, defective
  spare, correction, detection, triple-error miscorrection, and triple errors
  saved by the extra rows.
* `tb_ecc_spare_mem_small` runs the same kind of test on a 3-bit code with 4
  base check bits and one spare.
* `tb_ecc_spare_mem_wide` (with its driver `tb/wide_code_run.sv`) builds the
  memory for 32 and 64 data bits. It injects every triple error for 3, 2, 1
  and 0 free spares and checks the number of miscorrections (see below).

To simulate with Verilator (5.x), for example the top:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/secded_pkg.sv tb/tb_ecc_spare_mem.sv --top-module tb_ecc_spare_mem
./obj_dir/Vtb_ecc_spare_mem
```

## How far to trust it, and where it is this design's own

Taken from the published architecture:

* the 16-bit Hsiao base matrix;
* the idea that free spares hold extra check bits and used spares repair;
* the block set and wiring: check bit generator, MUXes only on the spare
  inputs, fuse block with EN outputs, spares wired straight to the syndrome
  generator, AND gates and OR for *error detected*, correction logic;
* the fuse latch behaviour;
* the chunk-based way of filling spare rows;
* the similarity-based logic sharing.

This design's own choices:

* **The spare rows.** The published spare rows are not available. These
  rows come from the two-stage procedure described above. The exact rule
  used here for boundary refinement is this design's reading of that step:
  which boundaries, the chunk order, and the area cap. The result has lower
  miscorrection than the published figures and a few more XOR gates with
  two or three spares.
* **The replacement step of the logic sharing** (greedy largest-first cover)
  and the caps on elaboration work.
* **Correction logic uses the gated syndrome.** It also knows which spare
  rows are active. This is required for correctness once a spare holds
  repaired data.
* **The `uncorrectable` output.**
* **A separate BAD fuse**, so a defective spare can be kept out of the code
  without being used for repair.
* **Repair granularity.** One spare replaces one whole bit column of the
  codeword for all words. The published fuse block is a row (word-line)
  scheme; here it is adapted to columns.
* **Memory organisation.** The depth (1024), the single synchronous port and
  the one-cycle read latency are assumptions.
* **The memory is a plain register array**, not an SRAM macro. The fuse latch
  is a behavioural model: it simulates, but it stands for an analog circuit
  and for laser or electrical fuse programming.

Not provided as defaults: 32- and 64-bit versions. The RTL is
parameterised, and `tb_ecc_spare_mem_wide` carries matrices for both widths,
but those matrices are this design's own (see "Wider words").

The decoder is plain SEC-DED and does not try to correct adjacent double
errors. Every double error is flagged `uncorrectable` and is never
miscorrected.

The design-time searches themselves (chunk selection and boundary refinement)
are not hardware and are not part of the RTL. Their results are the constants
in `secded_pkg`.
