# SRAM-based ternary CAM with fast mapping and updating

A content-addressable memory (CAM) takes a key and returns the address at which
that key is stored. A ternary CAM (TCAM) also lets a stored word hold
"don't care" bits. A stored `100X` matches both `1000` and `1001`. Classical
TCAMs compare the key against every stored word in dedicated match-line cells.
This design builds a TCAM out of ordinary memory blocks instead. Lookup becomes
a plain memory read, and updating any single entry takes two clock cycles,
whatever the depth of the CAM and whatever was stored there before.

The default configuration is a **512-entry × 36-bit TCAM**. It uses 64 memory
blocks of 512 rows each, the geometry of 18-Kbit FPGA block RAMs.

## Main idea: the key is the row address

The 36-bit CAM word is cut into K = 4 subwords of SUB_W = 9 bits, named
`Csw(0)` to `Csw(3)`, with `Csw(0)` the least significant. The memory is
organised as L = 16 **layers**, and each layer is made of K **blocks**:

```
             key[8:0]   key[17:9]  key[26:18] key[35:27]
                |          |          |          |
  layer 0   [block 0]  [block 1]  [block 2]  [block 3]    512 rows x 32 columns each
                 \          \         /          /
                  32 x 4-input AND  ->  match lines of addresses 0..31
  layer 1   ...                       ->  match lines of addresses 32..63
  ...
  layer 15  ...                       ->  match lines of addresses 480..511
                                             |
                                    priority encoder -> match_found, match_addr
```

- Each **column** of a layer stands for one CAM address. A layer has N = 32
  columns, so layer `l` holds addresses `l*32 .. l*32+31`.
- **Row** `r` of block `j` is the set of addresses whose subword `j` can be `r`.
  Bit `c` of that row is 1 when the word at column `c` has subword `j` equal
  to `r`.
- **Search:** every block reads the row addressed by its own subword of the key.
  An address matches when its column bit is 1 in all K blocks of its layer,
  which a K-input AND per column checks. All 16 layers are read in parallel, so
  the result is all 512 match lines at once. The priority encoder then reports
  the lowest matching address.
- **Mapping a word (update):** the word's subwords are the row addresses.
  Storing word `w` at address `a` writes column `a mod 32`, and only in layer
  `a / 32`. The other 15 layers are not written.

### Ternary entries

A subword with `x` don't-care bits covers 2^x row values. It is stored by
setting its column bit in every row it covers. A fully don't-care subword sets
the whole column. The search side is unchanged: one read per block, then the
AND. The mask applies per bit, so any mix of 0, 1 and X in a stored word is
represented exactly. A word matches a key exactly when every cared-for bit is
equal.

### Why an update takes two cycles at any depth

An update rewrites the **whole column** of the selected layer in one cycle. For
each row of each of the K blocks, the new bit is 1 if the row matches that
block's ternary subword and 0 otherwise. The old word's bits are cleared in the
same write. So the update never needs to read or know the old contents, never
touches other addresses, and never reorders entries. Addresses can be written
in any order.

The price is that one write touches one bit in every row of a block. The
blocks are therefore register arrays with a write enable per row, not
single-port block RAMs that write one row per cycle. This is the main place
where the RTL goes beyond the source description, which explains mapping for
a binary CAM by setting one addressed bit per block. With `store = 0` the same
column write clears the address (delete).

## Pipeline and timing

Both operations go through two clocked stages. At most one operation is taken
per cycle.

| cycle | update (`wr`)                                                            | search (`srch`)                                  |
|-------|--------------------------------------------------------------------------|--------------------------------------------------|
| t1    | register address, word, mask; split them into subwords (`fmu_subword_gen`) | register key; split it into subwords              |
| t2    | decode the layer and column (`fmu_layer_ctrl`); rewrite that column in the K blocks of that layer | every block reads the row its subword addresses  |
| out   | `wr_done` pulses                                                         | `srch_done` pulses with `match_lines`, `match_found`, `match_addr` |

- **Update latency:** 2 cycles. **Search latency:** 2 cycles.
- One operation can be issued every cycle, for example back-to-back searches.
- A search issued in the cycle right after an update already sees the new
  entry.
- `match_lines`, `match_found` and `match_addr` are combinational from the
  block read registers. They are meaningful when `srch_done` is high.
- If `wr` and `srch` are both high, the update is taken and the search is
  dropped. An assertion reports it.
- Reset (`rst_n` low, synchronous) clears every block, so the TCAM is empty.

## Top-level interface: `fmu_tcam`

| port          | dir | width   | meaning                                          |
|---------------|-----|---------|--------------------------------------------------|
| `clk`         | in  | 1       | clock, rising edge                               |
| `rst_n`       | in  | 1       | synchronous active-low reset, empties the TCAM   |
| `wr`          | in  | 1       | update request                                   |
| `wr_addr`     | in  | 9       | address to update                                |
| `key`         | in  | 36      | word to store (with `wr`) or search key (with `srch`) |
| `mask`        | in  | 36      | don't-care bits of the stored word, 1 = X        |
| `store`       | in  | 1       | 1 = store the word, 0 = delete the address       |
| `srch`        | in  | 1       | search request                                   |
| `wr_done`     | out | 1       | update finished                                  |
| `srch_done`   | out | 1       | search result valid                              |
| `match_lines` | out | 512     | one bit per address: that address matches        |
| `match_found` | out | 1       | at least one address matches                     |
| `match_addr`  | out | 9       | lowest matching address                          |

Parameters: `SUB_W` (subword bits, so a block has 2^SUB_W rows), `K` (blocks
per layer), `N` (columns, i.e. addresses, per layer) and `L` (layers). The
word width is `K*SUB_W` and the depth is `L*N`. The defaults are 9, 4, 32 and
16, set in `fmu_pkg`.

How the defaults are derived: an 18-Kbit block used as 512 × 36 gives 9-bit
subwords, so a 36-bit word needs 4 blocks per layer. 64 blocks then make 16
layers, and 512 addresses over 16 layers give 32 columns per layer.

## Files

| file                        | contents |
|-----------------------------|----------|
| `rtl/fmu_pkg.sv`            | default sizes, operation enum `op_e`, `ternary_hit()` |
| `rtl/fmu_subword_gen.sv`    | t1 request register and word/mask splitter |
| `rtl/fmu_layer_ctrl.sv`     | address to one-hot layer write enable and column; read enables for a search |
| `rtl/fmu_sram_block.sv`     | one 2^SUB_W × N block: registered row read, ternary column write |
| `rtl/fmu_layer.sv`          | K blocks plus N K-input ANDs |
| `rtl/fmu_priority_encoder.sv` | match lines to found flag and lowest set index |
| `rtl/fmu_tcam.sv`           | top level |
| `tb/tb_*.sv`                | one self-checking testbench per module, plus `tb_fmu_tcam_full` |

## Verification

Each testbench checks against values it works out itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`. Each has a watchdog.

- `tb_fmu_sram_block`, `tb_fmu_layer`, `tb_fmu_subword_gen`,
  `tb_fmu_layer_ctrl`, `tb_fmu_priority_encoder` test the individual blocks,
  mostly with random stimulus against bit-level models.
- `tb_fmu_layer` also maps one example word: subword 6 to the first block and
  subword 5 to the second, at column 1 of an 8-row, 4-column layer. It checks
  that only that key raises column 1, even with a fully don't-care word next
  to it.
- `tb_fmu_tcam` tests the top end to end on three small instances:
  - the 4-entry example `0100, 0111, 011X, 11XX`. Key `0111` matches addresses
    1 and 2, and the encoder must report 1.
  - an 8 × 6 instance (L = 2, K = 2, 8-row blocks). It covers the mapping
    example and a second entry in the second layer.
  - a 32 × 8 instance driven with about 4000 random stores, ternary stores,
    in-place updates, deletes and searches. All match lines and both latencies
    are compared with a table of (value, mask, valid) entries. The test also
    counts that each of these occurs at least once: binary store, ternary
    store, update of a used address, delete, multiple match, miss, a search in
    the cycle after a write, and back-to-back searches.
- `tb_fmu_tcam_full` runs the same kind of test, with about 20000 operations,
  on the default 512 × 36 TCAM with no parameter changed.

To simulate with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/fmu_pkg.sv rtl/fmu_*.sv \
          tb/tb_fmu_tcam_full.sv --top-module tb_fmu_tcam_full
./obj_dir/Vtb_fmu_tcam_full
```

Replace the testbench file and top-module name to run another test. The
full-size test runs in well under a minute.

## Departures and open points

- **Ternary storage and column-wide updates are this design's own.** The
  source describes mapping for a binary CAM: set one bit per block, addressed
  by the subword. It does not say how an old word is removed when an address
  is updated. Ternary words and updates independent of the old contents come
  from rewriting the whole column. This also makes the blocks register arrays
  rather than block RAMs. A block-RAM version would need to keep a copy of
  each address's old word and clear its rows one write at a time.
- **Subword order:** block 0 of every layer takes the least significant
  subword.
- **Priority:** the lowest matching address wins.
- **Port list:** the source shows a demonstration top with ports
  `data(23:0)`, `sw(5:0)`, `clk`, `wr`, `addr(7:0)`, `match(3:0)` without
  saying what they carry. This RTL uses its own port list, sized for the
  512 × 36 configuration.
- **Not specified in the source, chosen here:** the reset, the
  `store`/delete flag, the `found` flag, the one-request-per-cycle interface,
  the registered block reads, and the 2-cycle search latency.
- **Not implemented:** the earlier table-based mapping schemes and the
  classical match-line TCAM. They serve only as points of comparison.
- **Power and timing:** only the logic function and the cycle timing are
  modelled and tested. Energy figures and FPGA area and delay results are not
  reproduced.
