# Compressed DMM-1 wedgelet store (D-FB&C+ decoder)

3D-HEVC codes depth maps with a mode called DMM-1. It splits a block in two with a
straight line, called a wedgelet. Every permitted wedgelet is a fixed N x N bit pattern,
so an encoder or decoder in hardware needs a table of all of them. Uncompressed,
the table holds 183,264 bits:

- 86 patterns of 4x4;
- 802 patterns of 8x8;
- 510 patterns of 16x16.

32x32 wedgelets are the 16x16 ones scaled up by two.

This RTL stores the table compressed in a format called **D-FB&C+** (dual first bit
and change, plus ending rows removal). A small decoder rebuilds one pattern at a time
on demand. With the published coded sizes (808, 16,150 and 21,930 bits) the whole
table fits in 38,888 bits, about 21% of the uncompressed size. The codes are made
offline, once; the hardware only decodes.

As built, the 4x4 part of the memory is 888 bits, not 808: the real 4x4 list, coded
with the ending-rows rule described below, needs 888 bits. The memory therefore holds
38,976 bits in all (see "Departures and choices").

## The code

A wedgelet is a straight-line split, so every row and every column of its pattern
changes value at most once. A row can therefore be described by its first bit and the
position where it changes. That position is called an ICode. It is `L = log2(N)`
bits wide: 2, 3 or 4 bits for 4x4, 8x8 and 16x16.

- ICode `c` means "the bits after column `c` (counting from 0) take the other value".
- ICode `N-1` means "no change": the row is all zeros or all ones.

One wedgelet is coded as:

```
first bit | column ICode | row-0 ICode | row-1 ICode | ... | row-k ICode
   1 bit       L bits         L bits        L bits             L bits
```

- The **first bit** is the top-left pixel.
- The **column ICode** gives where the first column changes. It tells the decoder the
  first bit of every row, so rows carry no first bit of their own. That is the "dual"
  part of the name.
- **Ending rows removal**: once the line has left the block through its left or right
  edge, every remaining row is the same all-zero or all-one row. Such rows are not
  stored. The code stops at the first of them.

Example (8x8, 16 bits instead of 64):

```
0 0 0 0 0 0 1 1     first bit 0, column changes after row 2  -> 0 010
0 0 0 0 1 1 1 1     row ICodes 5, 3, 1                        -> 101 011 001
0 0 1 1 1 1 1 1     row 3 uniform, below the column change    -> 111, end
1 1 1 1 1 1 1 1
1 1 1 1 1 1 1 1     (rows 4..7 not stored)
...
```

The codes of all wedgelets of one block size are packed back to back, with no
padding, into a byte-wide memory. The first bit of a code is bit 7 of a byte. One
ICode may therefore straddle two bytes.

### How the decoder knows a pattern has ended

The code carries no length. The decoder stops after row `N-1`, or earlier at a
uniform row (ICode `N-1`) that meets either of these conditions:

- it lies below the first-column change (row > column ICode);
- it comes after a row that had a change.

For a straight-line split, such a row is exactly the first row of the trailing run of
identical uniform rows. Uniform rows at the top of a block match neither condition, so
they are decoded normally. The decoder then copies the stopping row into every row
below it in one cycle. This stop rule is this design's formulation; the testbench
coder applies the independent rule "drop the rows after the first row of the trailing
run of identical all-equal rows", and the two agree on every generated wedgelet.

## Datapath

```
 coded WMem --8--> InputReg --bits--> ControlUnit --+--> AuxB ----+
 (wmem_coded)     (dfbc_input_reg)   (dfbc_control)  +--> AuxCol --+--> cci --+
                                                     +--> AddressReg          |
                                                             |                v
                                                          PattMem --16--> ci x16 --16--> OutMatrix --> row port
                                                         (patt_mem)   (ci_row_inverter) (out_matrix) (wedge_upscale)
```

- **InputReg** (`dfbc_input_reg`) reads one byte per memory access. It keeps the unread
  bits left-aligned, so the next ICode is always at the top, and joins the leftover
  bits of a split ICode to the next byte. It is 16 bits deep rather than 8, so a new
  byte can be fetched while the previous one is still in use. That keeps up with one
  4-bit ICode per cycle.
- **ControlUnit** (`dfbc_control`) has three states:
  - IDLE waits for a request.
  - HEAD loads the first bit into **AuxB** and the column ICode into **AuxCol**.
  - ROWS loads one row ICode per cycle into **AddressReg**, together with the row
    number. It also applies the stop rule above.
- **PattMem** (`patt_mem`) is a constant 16 x 16-bit table. Entry `a` is zeros in
  columns 0..a and ones after. It covers every row that starts with 0, for every block
  size: a smaller block uses the first N columns, and entry N-1 then reads as "no
  change".
- **cci / ci** (`ci_row_inverter`) supplies the rows that start with 1, so PattMem
  stores only half the rows. cci works out the row's first bit from the first column:
  AuxB for rows 0..AuxCol and the complement below. When that bit is 1, the sixteen
  ci cells invert the PattMem row. Columns beyond N are forced to 0.
- **OutMatrix** (`out_matrix`) is 16 x 16 flip-flops, cleared at each start. Smaller
  blocks occupy its top-left corner. A "fill" write copies one row down to the last row
  of the block.
- **Row port** (`wedge_upscale`) reads a row of the finished pattern. For a 32x32
  request it returns row `y/2` with every bit doubled, which is how 32x32 patterns are
  derived from the 16x16 data.

`dfbc_decoder` wires these together. `dfbc_wedgelet_store` is the top: it adds the
coded memory and the row port. The shared constants and the block-size type are in
`dfbc_pkg`.

## Using the top (`dfbc_wedgelet_store`)

| port | dir | meaning |
|---|---|---|
| `load_en`, `load_addr`, `load_data` | in | write the coded image into the WMem, one byte per cycle, before use |
| `start` | in | begin one wedgelet; ignored while `busy` |
| `blk` | in | `BLK_4X4`, `BLK_8X8`, `BLK_16X16`, `BLK_32X32` (value = log2 N) |
| `start_bit` | in | bit address of the code (when `cont` = 0) |
| `cont` | in | decode the code that follows the previous one, reusing the bits already fetched |
| `busy`, `done` | out | `done` pulses for one cycle when `mat` holds the full pattern |
| `mat[16]` | out | the pattern; row `r`, bit `c` = column `c` |
| `rd_row`, `rd_data` | in/out | combinational row read, 32 bits wide for 32x32 |
| `rows_stored` | out | rows the code contained (< N when ending rows were removed) |
| `next_bit` | out | bit address right after the code just decoded |

To scan a whole list, as a DMM-1 encoder does, issue the first request with the
list's bit address and all others with `cont = 1`. For random access, as a DMM-1
decoder needs, give `start_bit`. The store does not map a wedgelet index to a bit
address. A system that needs random access has to keep such an index table, or
record `next_bit` while scanning.

**Timing.** The memory read is synchronous, with one cycle of latency. A decode
started with `start_bit` needs three cycles before its first bits are usable. After
that it takes one cycle for the header, one per stored row and one to write the last
row. `done` is high `stored_rows + 6` cycles after the cycle that presents `start`, or `stored_rows + 2`
when `cont` finds the bits already fetched. Removed ending rows cost nothing.

**Default size.** `dfbc_pkg::WMEM_BYTES` is 4872 bytes: 111 for 4x4, 2019 for 8x8 and
2742 for 16x16. The 8x8 and 16x16 regions are the published coded sizes (16,150 and
21,930 bits) rounded up to whole bytes. The 4x4 region holds the 888 bits that the
real 4x4 list codes to. Change `WMEM_BYTES` (or the top's `DEPTH`) for a different list.

## Departures and choices

- The memory has a load port. The codes are meant to be fixed at design time, so a
  ROM would do.
- InputReg is 16 bits, not one byte. Reading bytes in bit order is unchanged.
- The request/done handshake, the state machine, the two-stage row pipeline, the
  asynchronous active-low reset, clearing OutMatrix at each start and zeroing columns
  outside the block are this design's choices.
- cci keeps AuxB for rows up to and *including* AuxCol. This matches the position
  meaning of ICodes.
- 32x32 upscaling is nearest-neighbour doubling.
- The 4x4 region is 111 bytes, not the 101 bytes that the published 808 bits would
  need. The 4x4 list built by the reference-software procedure has 86 patterns, and
  its size without ending rows removal, 86 x 11 = 946 bits, equals the published D-FB&C figure.
  But ending rows removal as defined here (drop only the rows after the first row of
  the trailing run of identical uniform rows) saves 58 bits, not 138; 22 of the 86
  patterns lose rows. The published 808 bits imply a stronger removal rule that the
  description does not pin down. The 8x8 and 16x16 lists were not regenerated, so
  whether they fit their regions under this rule is not verified.
- One memory holds all three block sizes, in separate byte-aligned regions. Separate
  memories per size would work the same way.
- Not included:
  - the DMM-1 encoder and decoder that consume the patterns;
  - the offline coder;
  - the index-to-address table mentioned above.

## How far it is verified

Each module has a self-checking testbench in `tb/`. All of them use the reference
models in `tb/dfbc_ref_pkg.sv`:

- a generator of random straight-line wedgelets;
- an independent D-FB&C+ coder.

The end-to-end test `tb_dfbc_wedgelet_store` runs the top at its default size.

- It fills the three WMem regions to their full sizes with coded random wedgelets:
  all 86 4x4, about 670 8x8 and 395 16x16 patterns. Random lines code a little larger
  than the real DMM-1 lists, so fewer of them fit.
- It walks every list with `cont` and decodes 300 patterns by address.
- It decodes every 16x16 pattern again as 32x32.
- It compares every matrix and every row read through the row port.
- It counts how often each mechanism occurs: ending rows removed, complete codes,
  inverted rows, rows below the column change, ICodes split across bytes, continued
  and addressed decodes, upscaling. It fails if any count is zero.

The decoder testbench also decodes the 16-bit worked example shown above.

`tb_dfbc_htm_list` is a workload test with a real list. It builds the 4x4 wedgelet
list the way the 3D-HEVC test model does: lines between grid points on the block
edges, at half-pel resolution, without duplicates or inverses. It checks that there
are 86 patterns and that the code fits the 4x4 region. It then loads the code into
the top and decodes the whole list in order. The 86 patterns take 575 cycles for 315
stored rows. The 8x8 and 16x16 lists of the reference software were not reproduced.

Area and power were not evaluated.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/dfbc_pkg.sv tb/dfbc_ref_pkg.sv tb/tb_dfbc_wedgelet_store.sv \
  --top-module tb_dfbc_wedgelet_store -o sim && ./obj_dir/sim
```

Every testbench ends with `TB_RESULT checks=N failures=M`. The same command runs
`tb_dfbc_htm_list`, `tb_dfbc_decoder`, `tb_dfbc_control`, `tb_dfbc_input_reg`, `tb_out_matrix`,
`tb_ci_row_inverter`, `tb_patt_mem`, `tb_wedge_upscale` and `tb_wmem_coded`: change
the testbench file and the top module. The end-to-end run takes well under a second.
