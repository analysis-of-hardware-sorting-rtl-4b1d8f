# A sorting instruction for an in-order RISC-V core

Software sorting costs O(n log n) instructions. This design replaces most of
that work with one instruction. `SORT` takes the 32 vector registers of the
core as 32 elements, orders them with a fixed sorting network, and writes
them back in order.

- **32-bit mode:** each register holds one 32-bit element.
- **16-bit mode:** each register holds two 16-bit elements, and two networks
  sort the upper and lower halves independently.
- **8-bit mode:** four networks sort the four byte lanes independently.

The intended use is a 3x3 median filter: with 8-bit pixels, one `SORT` finds
the medians of four windows.

The RTL covers the execute-stage part of the core. It does not include the
rest of the processor (fetch, integer decode, general-purpose registers, ALU,
CSRs, multiplier, load/store unit, memory). The RTL is:

- the vector register file;
- the sorting networks and their comparators;
- decoding of the `SORT` instruction;
- the logic that holds the pipeline while a multi-cycle sort runs.

The top module is `sort_core`.

## The sorting network

### Compare-and-swap

Every network is built from one primitive, `sort2`. A comparator computes
`A < B` and drives the select line of two multiplexers:

| A < B | `max_o` | `min_o` |
|-------|---------|---------|
| 0     | A       | B       |
| 1     | B       | A       |

Elements are unsigned.

### Four elements from five units

`sort_unit` with `N = 4` works in three steps:

1. Two `sort2` units order the pairs (A, B) and (C, D).
2. One unit compares the two larger elements. Its larger output is the
   overall maximum. A second unit compares the two smaller elements. Its
   smaller output is the overall minimum.
3. A fifth unit orders what is left: the loser of the "large" comparison and
   the winner of the "small" comparison. These are the second and third
   outputs.

### Doubling the size

The same pattern doubles any sorting unit. An N-element unit is made of five
N/2-element units:

```
            +--------+  larger N/4  +--------+---- largest N/4 (in order) ---> q[0 .. N/4-1]
 d[0..N/2-1]|  sort  |------------->|  sort  |
            |  N/2 X |--+   +------>|  N/2 hi|--+ smaller N/4
            +--------+  |   |       +--------+  |      +--------+
                        |   |                   +----->|  sort  |
            +--------+  |   | larger N/4               |  N/2   |---> q[N/4 .. 3N/4-1]
 d[N/2..N-1]|  sort  |--|---+       +--------+  +----->|  mid   |
            |  N/2 Y |--+---------->|  sort  |--+      +--------+
            +--------+  smaller N/4 |  N/2 lo| larger N/4
                                    +--------+---- smallest N/4 (in order) ---> q[3N/4 .. N-1]
```

1. X and Y each sort half of the input.
2. The `hi` unit sorts the larger halves of X and Y together. Its top N/4
   outputs are the N/4 largest elements overall. This holds because an
   element outside the larger half of X or Y already has N/4 larger elements
   above it in its own sequence.
3. By the same argument, the bottom N/4 outputs of the `lo` unit are the
   smallest N/4 elements.
4. The `mid` unit sorts the remaining N/2 elements, which form the middle of
   the result.

`sort_unit` applies this recursion down to `sort2`. The output is
descending: `q_o[0]` is the largest element and `q_o[N-1]` the smallest.

### Cost and depth

The cost grows by a factor of five and the depth by a factor of three per
doubling:

| N  | `sort2` units | `sort2` levels on the longest path |
|----|---------------|------------------------------------|
| 2  | 1             | 1                                  |
| 4  | 5             | 3                                  |
| 8  | 25            | 9                                  |
| 16 | 125           | 27                                 |
| 32 | 625           | 81                                 |

This is more hardware than a bitonic or odd-even merge network of the same
size. Its advantage is that it is regular and made of a single kind of
block.

## Lanes and the SORT instruction

`sort_lanes` cuts the 32 vector registers into `32 / ELEM_W` bit-slices:

- Lane `l` takes bits `[l*ELEM_W +: ELEM_W]` of every register.
- Its own `sort_unit` orders the lane.
- The sorted elements go back into the same bits: register `v0` gets the
  largest element of each lane and `v31` the smallest.
- Lanes never mix. A 16-bit sort of `{hi16, lo16}` registers orders the
  upper and lower halves separately.

`sort_core` holds all three widths (one 32-bit lane, two 16-bit lanes, four
8-bit lanes), and the instruction selects one of them.

`SORT` uses the standard RISC-V I-type layout. rd, rs1 and the immediate are
ignored, because the instruction always reads and writes the whole vector
register file.

| field                         | value                        |
|-------------------------------|------------------------------|
| opcode `[6:0]`                | `0001011` (custom-0)         |
| funct3 `[14:12]` = `000`      | 32-bit elements, one lane    |
| funct3 `[14:12]` = `001`      | 16-bit elements, two lanes   |
| funct3 `[14:12]` = `010`      | 8-bit elements, four lanes   |
| any other funct3              | `illegal_o`, no effect       |

Using one opcode with a funct3 per width comes from the original design. The
concrete opcode and funct3 values are choices of this implementation, in
`sort_pkg`.

## The fast comparator

`sort2` can use either of two comparators:

- **Basic comparator** (`FAST_CMP = 0`, the default): a plain `<`, left to
  synthesis.
- **Look-ahead comparator** (`FAST_CMP = 1`): `fast_cmp`, built for 8, 16
  and 32 bits.

The look-ahead comparator is built in three layers:

- `cmp_lookahead4`: XORs each bit pair and produces a one-hot `CMP_i` that
  marks the most significant bit where A and B differ.
- `fast_cmp4`: gates each `CMP_i` with `A_i & ~B_i` (for A>B) and
  `~A_i & B_i` (for A<B), then ORs each set into one output. This gives two
  flags that are never both high.
- `fast_cmp`: builds wider comparators as a tree. Each nibble gives a flag
  pair. The greater-than flags of a group form a small number G and the
  less-than flags a number L. G > L exactly when the most significant
  differing nibble has A above B, so another compare unit on (G, L) combines
  the group. The tree shape depends on the width:
  - 8 bits: two nibble units, then a 2-bit unit.
  - 16 bits: four nibble units, then a 4-bit unit.
  - 32 bits: eight nibble units, then two 4-bit units, then a 2-bit unit.
- `fast_cmp2`: the 2-bit unit at the root. It only ever sees flag pairs, so
  it reduces to `A>B = A1 | (~A1 & A0 & ~B1 & ~B0)`.

In the original FPGA results the fast comparator saved a few nanoseconds at
32 bits, about 1 ns at 16 bits and nothing at 8 bits. It cost 1.6 to 3.6
times the LUTs of the sorting unit. That is why it is off by default.
`sort2` swaps its inputs to the fast comparator, since B > A is the same as
A < B.

## Timing: single-cycle and pipelined sorting

The instruction stays in the execute stage until the sort finishes. The
surrounding pipeline must hold the instruction, unchanged, on
`instr_valid_i`/`instr_i` while `stall_o` is high.

**`SORT_STAGES = 1` (default).** The network is purely combinational
between the register file's full-width read port and its bulk write port.
`SORT` completes in the cycle it reaches execute: `sort_done_o` is high in
that cycle, and the registers hold the result after the clock edge. The
clock has to accommodate 81 comparator-plus-mux levels. On the original FPGA
this meant roughly 9 to 12 MHz instead of 167 MHz.

**`SORT_STAGES = S > 1`.** This is the pipelined variant; the original used
28 stages to reach 167 MHz again.

- Each `sort_lanes` instance puts `S-1` register stages after its network.
- `sort_hazard` counts the cycles of the instruction. It raises `stall_o`
  for `S-1` cycles and `sort_done_o` in cycle `S`, so every `SORT` costs S
  cycles.
- The registers sit at the network output because the design relies on
  register retiming in synthesis to spread them through the network. Without
  retiming the latency is right, but the clock does not improve.
- An in-order core cannot overlap independent instructions with a running
  sort, so this variant only pays off when sorts are rare.

## Vector register file

`vreg_file` holds:

- 32 vector registers of 32 bits;
- 32 type registers of 16 bits, one per vector register;
- a 6-bit vector length register.

It has the following ports:

- one element write port and one combinational element read port, for the
  load/store path;
- a type-register port and a vector-length write port;
- a full-width read (`all_o`) and a full-width write (`bulk_we_i`/`bulk_i`)
  for the sorter.

A bulk write wins over an element write in the same cycle; an assertion
flags such a collision. `SORT` ignores the type and length registers. Reset
clears everything.

## Top-level ports (`sort_core`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `instr_valid_i`, `instr_i` | in | 1, 32 | instruction in the execute stage |
| `stall_o` | out | 1 | hold the pipeline (pipelined variant only) |
| `sort_done_o` | out | 1 | a `SORT` writes back this cycle |
| `illegal_o` | out | 1 | `SORT` opcode with an unassigned funct3 |
| `vwe_i`, `vwaddr_i`, `vwdata_i` | in | 1, 5, 32 | element write (vector load) |
| `vraddr_i` → `vrdata_o` | in → out | 5 → 32 | element read (vector store) |
| `vtwe_i`, `vtaddr_i`, `vtdata_i` → `vtdata_o` | in → out | 1, 5, 16 → 16 | type registers |
| `vlwe_i`, `vl_i` → `vl_o` | in → out | 1, 6 → 6 | vector length |

Parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `SORT_STAGES` | 1 | cycles per `SORT`; 28 in the original pipelined variant |
| `FAST_CMP` | 0 | 1 selects the look-ahead comparator |
| `HAS_SORT32`, `HAS_SORT16`, `HAS_SORT8` | 1, 1, 1 | which lane sets are built; a `SORT` for a missing width raises `illegal_o` |

## Files

| file | contents |
|------|----------|
| `rtl/sort_pkg.sv` | opcode, funct3 and mode enums, I-type struct |
| `rtl/sort_core.sv` | top: decoder, hazard logic, three lane sets, register file |
| `rtl/sort_lanes.sv` | lane split, one `sort_unit` per lane, optional output stages |
| `rtl/sort_unit.sv` | recursive N-element sorting network |
| `rtl/sort2.sv` | compare-and-swap |
| `rtl/fast_cmp.sv`, `fast_cmp4.sv`, `fast_cmp2.sv`, `cmp_lookahead4.sv` | look-ahead comparator |
| `rtl/vreg_file.sv` | vector registers, type registers, vector length |
| `rtl/sort_decoder.sv` | `SORT` recognition and width selection |
| `rtl/sort_hazard.sv` | pipeline hold for multi-cycle sorts |

Each file opens with a description of its interface, its timing, and which
parts follow the original design.

## Simulating

Each testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/sort_pkg.sv tb/tb_median_filter.sv --top-module tb_median_filter
./obj_dir/Vtb_median_filter
```

Verilator finds the other modules through `-Irtl -Itb` by file name.

| testbench | what it covers |
|-----------|----------------|
| `tb_median_filter` | `sort_core` at default parameters. 3x3 median filter on 16x16, 32x32 and 64x64 8-bit images, four windows per `SORT`; the 16x16 image also in 16- and 32-bit modes. Checks every median and the one-cycle `SORT`. |
| `tb_sort_core` | Two cores, through the driver `sort_core_run`. The first has 28 stages: all widths on random and repeated-value data, re-sorting, an illegal funct3 and a non-`SORT` instruction; it checks every register, 28 cycles per `SORT` and 27 stall cycles each. The second is a single-cycle core with only the 8-bit lanes, where 32- and 16-bit `SORT`s must be rejected. |
| `tb_sort_lanes` | 8-bit lanes (fast comparator, combinational) and 16-bit lanes (4 stages, back-to-back requests, exact latency). |
| `tb_sort_unit` | N = 4, 8, 32; 8-bit elements with the fast comparator, 32-bit with the basic one. |
| `tb_sort2`, `tb_fast_cmp`, `tb_fast_cmp4`, `tb_fast_cmp2`, `tb_cmp_lookahead4` | exhaustive where feasible, random otherwise |
| `tb_vreg_file`, `tb_sort_decoder`, `tb_sort_hazard` | the remaining blocks; `tb_sort_hazard` measures 28-cycle and 1-cycle sorts |

Build times are dominated by the size of the flattened network: 4,375
compare-and-swap units in `sort_core`. A `sort_core` testbench takes about
one minute to build with the basic comparator. With `FAST_CMP = 1` in every
lane it takes over ten minutes. The simulations themselves run in under a
second.

Linting `sort_unit` as its own top level makes Verilator report the
recursion's internal arrays as undriven or unused. This is an artefact of
linting a self-instantiating module as the top. Instantiated from any other
module, the network is complete; the testbenches check every output.

## Where this implementation departs from the original design, and its limits

- **One core, three widths.** Each system in the original carried a single
  width: one 32-bit, two 16-bit or four 8-bit units. The instruction
  encoding reserved a funct3 for each width, so by default this core
  includes all three. To build exactly one of the original systems, clear
  the other two `HAS_SORT*` parameters. For example, `HAS_SORT8` alone gives
  the four-lane 8-bit system.
- **Pipeline registers.** The original inserted registers in the
  compare-and-swap blocks and let a retiming tool place them. Here they sit
  after the network, and a retiming-capable synthesis flow is assumed.
- **Choices the original leaves open:** the encoding, unsigned comparison,
  descending order with `v0` largest, the register-file ports and reset, and
  the illegal-funct3 behaviour.
- **Reduced 2-bit comparator.** It follows the circuit (output A>B). The
  equation printed beside it in the original cannot be right, because A0 and
  B0 are never both high.
- **Not included:** the rest of the processor (prefetch buffer, base decoder,
  general-purpose registers, ALU, CSRs, multiplier, load/store unit, memory).
  They come from an existing RISC-V core. Vector loads and stores reach this
  block through its element port.
- **Not modelled:** clock frequency, area and power. The figures quoted
  above come from the original FPGA implementation. They describe the
  design, not measurements of this RTL.
