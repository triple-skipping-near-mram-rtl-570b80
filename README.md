# TS-NMC: a triple-skipping near-MRAM multiply-accumulate engine

Neural-network inference at the edge is dominated by memory traffic, and much
of that traffic carries zeros: ReLU turns about half of the activations into
0, and pruning removes whole groups of weights. A conventional sparse
accelerator can skip the arithmetic on a zero operand, but it still has to
write the operand into memory and read it back to find out that it is zero.

This design moves that decision ahead of the memory. Every 64-bit vector
(eight 8-bit values) stored in the STT-MRAM arrays carries one extra bit, the
**sparse flag**, which is 1 when the whole vector is zero. The flag lets the
hardware skip three things:

1. **write**: an all-zero vector only writes its flag cell, not its 64 data cells;
2. **read**: before a vector product, only the two flag bits (weight and
   activation) are sensed; if either is 1 the data sense amplifiers stay off;
3. **calculation**: the adder tree, the partial-sum register and the operand
   registers do not switch, and the product is forced to 0 by AND gates.

The compute sits next to the memory arrays (near-memory computing): each
processing element (PE) owns a weight array, an activation buffer and a small
bit-serial multiplier, and many PEs work in parallel on slices of one long dot
product.

The RTL follows the architecture of the TS-NMC paper (Chen, Cai, Liu, Yang,
"Triple-Skipping Near-MRAM Computing Framework for AIoT Era"). The MRAM cells
and sense amplifiers are analog parts and appear here as their logical
behaviour; the bus interface, the quantizer and the number of PEs are this
design's own choices (see *Departures and choices* below).

## Sparse flag generation

`sparse_flag_gen` reduces an n-bit word pairwise: at each level bits 2i and
2i+1 are ORed into bit i, and when a level has an odd number of bits the last
one passes through. When two bits remain, a NOR produces the flag. For the
64-bit vector this is 62 two-input OR gates and one NOR, in six levels. The
generator sits in front of the write port of both memories of every PE, so
software never computes flags.

## The processing element

`nmc_pe` computes the dot product of one weight vector `w` (8 signed bytes)
and one activation vector `a` (8 unsigned bytes).

**Weight array** (`mram_core_array`): 64 rows x 2 sub-arrays = 128 rows, each
64 data bits plus the flag bit (the 64x65x2 array, about 1 KB). The row
address is `{sub-array, row}`. The data sense amplifiers read a whole row at
once and their output latch is the PE's `D_in` register.

**Activation buffer** (`mram_pingpong_buffer`): two banks, each holding one
activation vector **transposed**. Row m of a bank holds bit m of all eight
activations,

    i_m = (a_0[m], a_1[m], ..., a_7[m]),   m = 0..7

plus a flag cell, so a bank is 8 rows x 9 cells. One row is sensed per cycle,
and the sense latch is the PE's `input` register. The two banks let the host
write the next vector while the PE reads the current one.

**Shift adder tree** (`shift_adder_tree`): multiplication of a bit-plane by
the weights is done with AND gates (a bit times a weight is either the weight
or 0). A three-level adder tree sums the eight gated weights, and the
previous partial sum is shifted left by one and added:

    S = sum_k ( i_m[k] AND w_k ) + (psum << 1)

Starting with psum = 0 and the most significant plane (m = 7), after eight
steps `psum = sum_k a_k * w_k` exactly. Weights are two's complement,
sign-extended before the AND; activations are unsigned.

### Operation timing

A `start` pulse (with `row_addr` and `bank`) is accepted while `busy` is 0.

| cycle after start | computed product                         | skipped product                  |
|-------------------|------------------------------------------|----------------------------------|
| 1 (FLAG)          | flag SAs read f_w (weight row), f_i (bank)| same                             |
| 2 (DATA)          | flag = f_w \| f_i = 0: weight SAs read the row into D_in, buffer reads plane 7, psum <= 0 | flag = 1: nothing is sensed, no register changes |
| 3 .. 10 (CALC)    | S for plane 7 .. 0; psum <= S; buffer reads the next plane; weight SAs stay off | - |
| done pulse        | cycle 11                                  | cycle 3                          |

`result` and `skipped` stay valid from `done` until the next start. On a skip
`result` reads 0 through AND gating while `psum`, `D_in` and `input` keep
their old contents, so no register or adder-tree node toggles.

Writes are independent of an operation: `w_we` writes a weight row and
`a_we` writes one bank; `w_wr_skip` / `a_wr_skip` pulse when the write was an
all-zero vector and only the flag cell was written.

## The MAC engine and the partial sum accumulator

`mac_engine` holds `N_PE` PEs (98 by default). A **pass** starts every PE on
the same core row and the same buffer bank, so the engine computes a dot
product of length `8 * N_PE` in which each PE handles its own 8-element
slice and decides on its own whether to skip. When all PEs are idle again,
their results are summed into the signed 32-bit accumulator:

- `first = 1` starts the accumulator from 0; otherwise the pass adds to it,
  so a dot product longer than `8 * N_PE` takes several passes;
- `last = 1` also produces the layer output
  `out_act = min(255, max(0, acc) >> shift)`: ReLU, then 8-bit quantization
  by a right shift with saturation.

`done` pulses 13 cycles after the start cycle, or 5 cycles if every PE
skipped; `pass_skips` counts the PEs that skipped.

## Host interface

`tsnmc_top` is an AMBA APB slave: an APB bridge of a microcontroller
connects to its ports. `tsnmc_apb_regs` decodes these 32-bit registers:

| addr | name    | access | meaning |
|------|---------|--------|---------|
| 0x00 | CMD     | W/R    | start a pass: [6:0] core row, [8] bank, [9] first, [10] last |
| 0x04 | STATUS  | R      | [0] busy, [1] out_valid, [15:8] out_act, [16] bank in use |
| 0x08 | SHIFT   | RW     | [4:0] quantization shift |
| 0x0C | DLO     | RW     | write data bits 31:0 |
| 0x10 | DHI     | RW     | write data bits 63:32 |
| 0x14 | WCMD    | W      | write {DHI,DLO} to weight row [6:0] of PE [22:16] |
| 0x18 | ACMD    | W      | write {DHI,DLO} to activation bank [0] of PE [22:16] |
| 0x1C | ACC     | R      | accumulator (signed) |
| 0x20 | PASSES  | R      | passes completed |
| 0x24 | SKIPOPS | R      | PE operations that skipped sensing and calculation |
| 0x28 | WSKIPS  | R      | vector writes that only wrote the flag |
| 0x2C | WAITS   | R      | wait states inserted |

Any other address answers with PSLVERR. Element k of a 64-bit vector is
bits `8k+7 : 8k`.

While a pass runs, writes to CMD and WCMD, and ACMD writes to the bank in
use, are stretched with PREADY = 0 until the pass ends. An ACMD write to the
*other* bank completes at once: this is how the ping-pong buffer is used,
loading the next activations during the current pass.

A typical layer: write SHIFT; for each output neuron write CMD with
`first = last = 1` and poll STATUS until busy is 0, then read `out_act`.

### Mapping a 784-64-10 network

A fully connected MNIST classifier with 784 inputs, 64 hidden neurons and 10
outputs has 784x64 + 64x10 = 50816 weights. The default 98 PEs hold it as
follows:

- layer 1: row r (0..63) of PE p holds `W1[r][8p .. 8p+7]`; bank 0 of PE p
  holds pixels `8p .. 8p+7`. One pass per hidden neuron.
- layer 2: row 64+o of PE p < 8 holds `W2[o][8p .. 8p+7]`; bank 1 of PE p < 8
  holds hidden values `8p .. 8p+7`. These are written during layer 1. Rows
  64..73 and bank 1 of PEs 8..97 are written as zero vectors, so those PEs
  only write their flags and skip every layer-2 pass.

The weights use 50816 of the 100352 weight bytes. Because the MRAM is
non-volatile, the arrays keep their contents while the engine is powered
off. The reset clears only the control state and sense latches, never the
arrays.

## Parameters

| parameter (module)             | default | origin |
|--------------------------------|---------|--------|
| `DATA_W`, `VEC_LEN` (package)  | 8, 8    | paper: i = j = 8, n = 64 |
| `CORE_ROWS`, `CORE_SUBS`       | 64, 2   | paper: 64x65x2 weight array |
| `BUF_BANKS`                    | 2       | paper: 8x9x2 ping-pong buffer |
| `N_BITS` (sparse_flag_gen)     | 64      | paper |
| `N_PE` (mac_engine, top)       | 98      | this design: 784 / 8 |
| `PSUM_W`, `ACC_W`              | 20, 32  | this design: overflow-free widths |

`ROWS` of `mram_core_array`, `nmc_pe` and `mac_engine` can be raised to 128
or 256 per sub-array. The paper discusses those sizes as alternatives; the
default is its main 64-row array.

## Departures and choices

- The 2T-2MTJ cell and its differential sense amplifier are represented by a
  stored bit and an enable-gated output latch that reads in one cycle. The
  paper models these at device level; their analog behaviour (resistance,
  sensing margin, energy) is not represented.
- Writes take one cycle per vector. The paper gives no write timing.
- The paper states the flag as "1 when all elements are 0" and builds it with
  n-2 ORs and one NOR. Its algorithm listing ends in an OR instead; the RTL
  follows the NOR (flag = 1 for a zero vector).
- The paper gives the order of the PE sequence (flag sense, data
  sense with psum reset, eight accumulate steps). The cycle counts above and
  the registered `done` pulse are this design's reading of that sequence.
- Activations are unsigned and weights signed. The paper only says 8-bit.
- The paper does not say how ReLU and quantization are done. Here it is a
  programmable right shift with saturation to 255, applied at the end of the
  last pass. Multi-pass accumulation (`first`/`last`) is this design's way of
  using the partial sum accumulator for vectors longer than the PE array.
- The paper only says the engine attaches to a Cortex-M3 over AMBA. The APB
  choice, the register map, the wait-state rule and the statistics counters
  are this design's.
- The number of PEs is not given in the paper; 98 makes a 784-input layer one
  pass per neuron.
- Stored flags: the flag is kept in the flag cell of every row of a buffer
  bank, and the PE reads it from row 7.

## Verification

Each module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog:

| testbench               | what it checks |
|-------------------------|----------------|
| `tb_sparse_flag_gen`    | 64-, 13-, 7- and 2-bit generators against `word == 0` |
| `tb_mram_core_array`    | every row, write skipping keeps old data, sense latches hold |
| `tb_mram_pingpong_buffer` | transposed planes of both banks, write skipping, read during write of the other bank |
| `tb_shift_adder_tree`   | single steps, full 8-step products with extreme values, zero forcing |
| `tb_nmc_pe`             | 150 operations against a reference dot product, skip detection, latency 11/3, ping-pong write during an operation |
| `tb_nmc_pe_rows256`     | the PE with 256 rows per sub-array: all 512 rows addressed correctly |
| `tb_mac_engine` (4 PEs) | 3-pass accumulation, ReLU/shift/saturation, pass_skips, latency 13/5, ping-pong writes |
| `tb_tsnmc_apb_regs`     | register read-back, command pulses, wait states, counters, PSLVERR |
| `tb_tsnmc_top`          | full default size: the 784-64-10 network over APB, with generated weights and image |

The top-level test compares all 64 hidden and 10 output values and their raw
accumulators with a reference model. It requires the counters to match
exactly. It also requires each mechanism to occur at least once: write
skipping, PE skipping, ping-pong writes during a pass, wait states, ReLU
clamping, saturation and two-pass accumulation. It runs in under a second.

To run a testbench with Verilator (from the directory that holds `rtl/` and
`tb/`):

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/tsnmc_pkg.sv tb/tb_tsnmc_top.sv --top-module tb_tsnmc_top -o sim
    ./obj_dir/sim

Substitute any other `tb_*` name. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/tsnmc_pkg.sv rtl/<module>.sv`.

## Files

- `rtl/tsnmc_pkg.sv`: shared sizes, types, bit-plane helper
- `rtl/sparse_flag_gen.sv`, `rtl/mram_core_array.sv`, `rtl/mram_pingpong_buffer.sv`,
  `rtl/shift_adder_tree.sv`: PE building blocks
- `rtl/nmc_pe.sv`: processing element
- `rtl/mac_engine.sv`: PE array and accumulator
- `rtl/tsnmc_apb_regs.sv`, `rtl/tsnmc_top.sv`: APB interface and top level
- `tb/tb_*.sv`: testbenches
