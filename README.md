# WiMAX channel deinterleaver with a floor-free address generator

The IEEE 802.16e (mobile WiMAX) channel interleaver spreads each block of
Ncbps coded bits with two permutations. The standard writes them with floor
functions and modulo operations on the bit index:

    m_k = (Ncbps/16) * (k mod 16) + floor(k / 16)
    j_k = s * floor(m_k / s) + (m_k + Ncbps - floor(16 * m_k / Ncbps)) mod s

where s is 1, 2 or 3 for QPSK, 16-QAM or 64-QAM. Computing the inverse of
this mapping directly in hardware needs dividers. This design follows the
scheme of the article *A Novel Design of Address Generator Circuitry for
WiMAX Deinterleaver*, which avoids them: the block is viewed as a matrix of
16 rows and Ncbps/16 columns, two counters walk through it, and a small
column permutation, chosen by the modulation, turns the counter values
directly into the deinterleaver address. The result is a generator built from
counters, incrementers, multiplexers and a shift, producing one address per
clock for every modulation and block size of the standard, plus the
two-bank memory that uses those addresses to deinterleave a bit stream.

## The address rule

Let d = 16 be the number of rows, `i` the column index
(0 .. Ncbps/16 - 1) and `j` the row index (0 .. 15). The generator visits
the matrix row by row, the column index moving fastest, so received bit
number `n = j * (Ncbps/16) + i` gets the address

    Kn = d * i' + j

where `i'` is the column after a modulation-dependent permutation:

| modulation | row condition | column condition | i'    |
|------------|---------------|------------------|-------|
| QPSK       | any           | any              | i     |
| 16-QAM     | j even        | any              | i     |
| 16-QAM     | j odd         | i even           | i + 1 |
| 16-QAM     | j odd         | i odd            | i - 1 |
| 64-QAM     | j mod 3 = 0   | any              | i     |
| 64-QAM     | j mod 3 = 1   | i mod 3 = 0 or 1 | i + 1 |
| 64-QAM     | j mod 3 = 1   | i mod 3 = 2      | i - 2 |
| 64-QAM     | j mod 3 = 2   | i mod 3 = 0      | i + 2 |
| 64-QAM     | j mod 3 = 2   | i mod 3 = 1 or 2 | i - 1 |

In words: for 16-QAM the odd rows swap neighbouring columns in pairs; for
64-QAM the columns are grouped in threes and each group is rotated by one
place per row, repeating every three rows. A permuted column never leaves its
group, so the address stays inside the block provided the number of columns
is a multiple of s, which holds for every size the standard permits.

`Kn` is the position, in the original (pre-interleaver) order, of received
bit `n`. For example, QPSK with Ncbps = 96 gives
0, 16, 32, 48, 64, 80, 1, 17, 33, ...; 16-QAM with Ncbps = 192 gives
0, 16, ..., 176 for row 0 and then 17, 1, 49, 33, 81, 65, ... for row 1;
64-QAM with Ncbps = 576 gives 17, 33, 1, 65, 81, 49, ... for row 1. The
testbenches confirm that this rule is exactly the inverse of the standard's
interleaver for all 15 legal (size, modulation) pairs.

## Address generator hardware

```
   column counter i ──┬──────────────────────────────┐
   (CLC, cleared by C0)│                               │
                       ├─► QPSK block: Ncbps/16, C0 ───┘ (col_last)
                       │                 i ───────────► M8 in 0
                       ├─► 16-QAM block  i' ──────────► M8 in 1 ──► × d ──► + ──► Kn
                       └─► 64-QAM block  i' ──────────► M8 in 2    (ML)    (A)
   row counter j ──────────── (to both QAM blocks) ──────────────────────┘
   (RWC, compare d-1)                    M8 select: modulation code
```

* **Counters** (`column_counter`, `row_counter`). The column counter
  advances on every accepted bit and is cleared after the last column; the row
  counter advances on that wrap and is cleared after row d-1. Both are shared
  by the three modulations.
* **QPSK block** (`qpsk_block`). Divides Ncbps by d to get the column count
  (a four-bit shift for d = 16) and compares the column counter with
  `cols - 1`. For QPSK no permutation is needed, so this divider/comparator
  pair is the whole QPSK-specific path, and it sets the block geometry for all
  modulations.
* **16-QAM block** (`qam16_block`). Two incrementers (i+1, i-1), a mod-2 of
  the column selecting between them (mux M2) and a mod-2 of the row choosing
  between that and the plain column (mux M3).
* **64-QAM block** (`qam64_block`). Four adders (i+1, i-2, i+2, i-1), two
  three-way muxes (M5, M6) steered by i mod 3, and a three-way mux (M7)
  steered by j mod 3. The mod-3 units are `modulo_unit` instances.
* **Mux M8, multiplier and adder** (`kn_addr_gen`, `addr_combiner`). The
  modulation code selects one permuted column; `Kn = 16 * i' + j` is a shift
  and an add.

Everything after the counters is combinational, so `Kn` belongs to the
counter state of the current cycle and a new address is available every
clock. Block size and modulation are sampled with the first bit of each
block (`first` = counters at zero) and held until the block ends, so they
may change freely between blocks.

Modulation codes: `00` QPSK, `01` 16-QAM, `10` 64-QAM (`wimax_pkg::mod_t`);
`11` behaves as QPSK.

## Two-bank deinterleaver memory

`wimax_deinterleaver` wraps the generator with two memory banks, M-1 and
M-2, of 576 words each (`pingpong_buffer`, two `bank_ram`s). The bank
select `sel` decides their roles: with `sel = 1`, M-1 is written and M-2 is
read; with `sel = 0` the roles are reversed. Each bank's address multiplexer
passes the write address (`Kn`) to the bank being written and the read
address to the other, and the output multiplexer passes M-1 for select 0 and
M-2 for select 1.

Received bit `n` is written at address `Kn`; the other bank, holding the
previous block, is read at addresses 0, 1, 2, ..., which is the original bit
order. `pingpong_ctrl` produces the read address and `sel`:

* When the last bit of a block is written and the read side is idle, or is
  reading its final word in the same cycle, `sel` toggles and reading of the
  new block starts at once. Blocks of equal size therefore stream back to
  back with no idle cycle on either side.
* The read side delivers one bit per clock until the block is out.
* If a block is complete before the previous one has been read out (a
  shorter block after a longer one), `in_ready` drops until the swap.

## Interface and timing of `wimax_deinterleaver`

| port        | dir | width  | meaning                                                  |
|-------------|-----|--------|----------------------------------------------------------|
| `clk`       | in  | 1      | clock, all state on the rising edge                      |
| `rst`       | in  | 1      | synchronous, active-high reset                           |
| `in_valid`  | in  | 1      | a received bit is offered                                |
| `in_ready`  | out | 1      | it is accepted on this edge (if `in_valid`)             |
| `in_data`   | in  | DATA_W | received (interleaved) bit                               |
| `ncbps`     | in  | 10     | block size in bits, sampled with a block's first bit     |
| `mod`       | in  | 2      | modulation code, sampled with a block's first bit        |
| `out_valid` | out | 1      | `out_data` holds a deinterleaved bit                     |
| `out_data`  | out | DATA_W | deinterleaved bit, original order                        |
| `out_last`  | out | 1      | last bit of a block                                      |

Parameters: `D` (rows, 16), `NCBPS_MAX` (bank depth, 576), `DATA_W` (bits
per word, 1; use more for soft decisions).

Throughput is one bit per clock in and out. With the read side idle, the
first output bit of a block is valid after the clock edge that follows the
edge accepting the block's last input bit: the banks swap on the first edge
and the synchronous RAM read completes on the second. A block must be fully
written before any of it can be read, so the latency of a bit is about one
block.

Supported block sizes (bits) per modulation:

| modulation | sizes                                     |
|------------|-------------------------------------------|
| QPSK       | 96, 144, 192, 288, 384, 432, 480, 576     |
| 16-QAM     | 192, 288, 384, 576                        |
| 64-QAM     | 384, 432, 576                             |

An assertion in the top fires if a write address ever reaches the block
size, which happens only for pairs outside this table (for instance 144-bit
16-QAM, whose nine columns cannot be paired).

## What follows the published description and what is added

Taken from the description: the matrix with 16 rows and Ncbps/16 columns;
the counters and their comparators; the divider that replaces a table of
per-code-rate column limits; the structure of the QPSK, 16-QAM and 64-QAM
blocks (adder constants 1, 2, 2, 1 in the 64-QAM block, mod-2 and mod-3
selects); the shared counters, multiplier and adder of the integrated
generator with its modulation mux; the two-bank memory with write enables
`sel` and `!sel` and the output multiplexer; the modulation codes.

Choices of this implementation:

* The column index is the fast one (one row at a time), as the published
  address sequences show.
* In the 64-QAM rule for rows with j mod 3 = 1, `i + 1` applies to columns
  with i mod 3 = 0 or 1, which is what the published address tables and
  waveforms show.
* `Kn` is used as the write address and a plain counter as the read address.
  The published description leaves the direction open; this choice makes
  the output the standard's deinterleaved order.
* The enable, configuration latching, `first`/`last` flags, synchronous
  reset, valid/ready handshake with its stall, synchronous-read RAM and
  delayed output-mux select.
* The divider is a division by the constant d, which is just a shift for d = 16.
* Only the selected modulation's address is formed; the published
  simulation shows all three side by side.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.
`tb/tb_wimax_ref_pkg.sv` holds the reference models: the standard's
interleaver with its floor functions, and the column rule above written as a
case analysis.

* `tb_kn_addr_gen`: every legal (size, modulation) pair, with and without
  idle cycles, is checked address by address against the inverse of the
  standard's interleaver. The test also checks the block flags, that a block
  takes exactly Ncbps clocks, that mid-block changes of `ncbps`/`mod` are
  ignored, and the published example sequences.
* `tb_wimax_deinterleaver` runs at the default parameters. It interleaves
  random blocks with the standard's formula and feeds them in: all 15
  configurations back to back, then a long block followed by short ones,
  then random configurations with idle cycles. It checks every output bit,
  `out_last`, one bit per clock and the latency. It also counts, and requires
  at least once, a modulation switch, a size change, an input stall, an idle
  input cycle and a gap-free bank swap.
* Block tests cover the counters, modulo units, the QPSK comparator against
  the eight column limits 5, 8, 11, 17, 23, 26, 29, 35, both permutation
  blocks exhaustively, the address combiner, the RAM (read-before-write) and
  the two-bank buffer and its control.

Run one test with Verilator, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_wimax_deinterleaver \
  -y rtl -y tb +libext+.sv rtl/wimax_pkg.sv tb/tb_wimax_ref_pkg.sv \
  tb/tb_wimax_deinterleaver.sv -o sim && ./obj_dir/sim
```

Replace the top module and testbench file for the others; add
`tb/tb_wimax_ref_pkg.sv` for the tests that import it.

## Files

| file                         | contents                                           |
|------------------------------|----------------------------------------------------|
| `rtl/wimax_pkg.sv`           | constants (d, 576) and the modulation type          |
| `rtl/wimax_deinterleaver.sv` | top: address generator, control, two-bank memory   |
| `rtl/kn_addr_gen.sv`         | integrated address generator                        |
| `rtl/qpsk_block.sv`          | divider and last-column comparator                  |
| `rtl/column_counter.sv`      | column counter                                      |
| `rtl/row_counter.sv`         | row counter with its d-1 comparator                 |
| `rtl/qam16_block.sv`         | 16-QAM column permutation                           |
| `rtl/qam64_block.sv`         | 64-QAM column permutation                           |
| `rtl/modulo_unit.sv`         | mod-2 / mod-3 unit                                  |
| `rtl/addr_combiner.sv`       | Kn = d * i' + j                                     |
| `rtl/bank_ram.sv`            | one memory bank                                     |
| `rtl/pingpong_buffer.sv`     | two banks with address and output multiplexers      |
| `rtl/pingpong_ctrl.sv`       | read address, bank select, flow control             |
