# NP-CGRA: a coarse-grained reconfigurable array for depthwise separable convolution

Light-weight CNNs such as MobileNet replace ordinary convolution with a
*depthwise separable convolution* (DSC): a depthwise convolution (DWC, one
K x K filter per channel, no summation across channels) and then a pointwise
convolution (PWC, a 1x1 convolution, i.e. a matrix multiplication over the
channels). A conventional CGRA runs these layers poorly, for three reasons:
- The PEs spend instructions on address arithmetic.
- DWC has little data reuse per channel.
- Neighbouring output pixels re-read the same input pixels.

NP-CGRA keeps the CGRA model, where a two-dimensional PE array executes one
*context* (a very long instruction word) per cycle from a configuration
memory. It adds four things:

1. **Crossbar-style memory bus.** Every PE row shares a horizontal bus (H-bus)
   fed from a banked *H-MEM*. Every PE column shares a vertical bus (V-bus)
   fed from its own *V-MEM* bank. A matrix multiplication can then stream one
   operand along the rows and the other down the columns, with output
   stationary in the PEs.
2. **Address generation units (AGUs).** Every bus has an AGU that computes
   each cycle's memory address from a handful of loop iterators broadcast by
   the controller. The PEs never compute addresses.
3. **Dual-mode MAC.** Every PE computes `A*B + C` in one cycle when the array
   is in MAC mode. In MUL/ALU mode it does one multiply or one ALU operation.
4. **Operand reuse network and global register file (GRF).**
   - Every PE exposes the operand it just used (`OutA`) to its four
     neighbours, and can write a neighbour's `OutA` into its own register
     file.
   - A DWC window can therefore slide across the array without reloading
     pixels.
   - The GRF holds the K x K depthwise weights and broadcasts one of them to
     every PE per cycle.

The RTL here is that array at its published size:
- 8x8 PEs and 16-bit data.
- 2 x 39 KB of data memory in 8 banks of 2496 words each.
- 32 contexts of 2312 bits.
- A 9-entry GRF and a 64-entry weight buffer.

It also contains the controller that runs one *block* of tiles for each of
the three mappings: PWC, DWC with any stride, and DWC with stride 1 using
operand reuse. The whole design is synthesizable SystemVerilog. Every module
has a self-checking testbench, and an end-to-end testbench runs convolutions
on the full-size array and compares them with a software reference.

## The processing element and the context word

`rtl/pe.sv`, `rtl/dual_mode_mac.sv`, `rtl/pe_array.sv`

Each PE has the following parts:
- Two operand multiplexers:
  - MUX A: register file, H-bus, V-bus, immediate, or a neighbour's
    `OutReg`.
  - MUX B: register file, H-bus, V-bus, the GRF broadcast, or a neighbour's
    `OutReg`.
  - These neighbour inputs are the usual result routing of a CGRA.
- A 4-entry register file.
- The dual-mode MAC/ALU.
- An output register `OutReg`, which is the accumulator.

`OutA` is the output of MUX A, so it is the operand the PE uses in this
cycle. It is not registered. The register-file write port takes either the
MAC/ALU result or a neighbour's `OutA`, selected by `WrSrc` and `InOpnd`.
The neighbour's operand is therefore in the local register at the next
clock edge, ready for the next cycle. Passing an operand on therefore costs no extra instruction: the
same context word that does a MAC also shifts the window.

A 36-bit PE instruction (`npcgra_pkg::pe_instr_t`) has these fields:

| field | bits | meaning |
|---|---|---|
| op | 4 | NOP, ADD, SUB, MUL, MAC, AND, OR, XOR, SLL, SRA, MAX, PASS, CLR |
| src_a, src_b | 3+3 | MUX A / MUX B source |
| reg_a, reg_b | 2+2 | register-file read indices |
| wr_en, wr_reg | 1+2 | register-file write |
| wr_src, in_opnd | 1+2 | write the result (0) or neighbour `in_opnd`'s `OutA` (1) |
| ab | 1 | `OutReg` is an address for an addressed load on the row's H-bus |
| db | 1 | `OutReg` is store data for the row's H-bus |
| imm | 14 | immediate for MUX A |

A context is 64 of these instructions plus 8 global bits, 2312 bits in all.
The global bits are:
- the GRF index (4 bits);
- `h_ld` and `v_ld`: drive the bank read data onto the busses this cycle;
- `h_st`: commit the row stores this cycle;
- one spare bit.

`OutReg` is written on every non-NOP operation. `CLR` zeroes it, so a
write-back context usually has `CLR` with `db=1`: the old value goes to
memory and the accumulator restarts at zero.

In MAC mode (the `mac_mode` input) a MAC opcode computes
`OutReg <= A*B + OutReg`. In MUL/ALU mode the same opcode only multiplies.
The ALU operations work the same in both modes. Products keep the low 16
bits, so the arithmetic is wrap-around 16-bit integer.

When several PEs of one row raise `db` or `ab` in the same cycle, the
lowest-numbered column wins. An assertion flags this case, because the
mappings never produce it.

## Memories

| memory | module | size | access |
|---|---|---|---|
| H-MEM | 8 x `mem_bank` | 8 banks x 2496 x 16 bit (39 KB) | reached from any H-bus through `mem_crossbar`, second port for DMA |
| V-MEM | 8 x `mem_bank` | 8 banks x 2496 x 16 bit (39 KB) | bank j is wired to column j, second port for DMA |
| configuration memory | `config_memory` | 32 x 2312 bit | one context read per cycle, host write port |
| weight buffer | `weight_buffer` | 64 x 144 bit | one entry (9 weights) per read |
| GRF | `grf` | 9 x 16 bit | loaded from the weight buffer in one write, read by index |

The memories behave as follows:
- **Data banks.** They have two ports. Port A belongs to the array and port B
  to the DMA. Reads are registered, with one cycle of latency. If both ports
  write the same word in one cycle, the array wins.
- **Prefetching.** Because port B is separate, the host can load the next
  depthwise channel into the unused half of H-MEM while the array works on
  the current one. This is the cross-channel prefetch. The end-to-end test
  does it.
- **Configuration memory.** It is read every cycle. When the controller is
  not reading, it outputs the all-NOP context.

## Address generation

`rtl/h_agu.sv`, `rtl/v_agu.sv`, `rtl/mau.sv`, `rtl/mem_crossbar.sv`

### The controller's iterators

The controller broadcasts these iterators:

| iterator | meaning |
|---|---|
| `t_cycle` | cycle within the tile |
| `t_wrap` | which pass ("wrap") over the input rows of the tile |
| `t_wcycle` | cycle within the wrap |
| `tid_r`, `tid_c` | tile coordinates within the block |

It also broadcasts the descriptor fields: N_i, K, S, B_c and the base
addresses. Each AGU adds its own bus number `aid` to these and produces a
`{bank, offset}` address. Each AGU is a small combinational circuit.

### Data layouts

The layouts below are what the host must store. The end-to-end testbench
writes them with the functions in `tb/tb_layout_pkg.sv`.

**PWC** computes OFM = IFM x W. IFM is N_w x N_i (pixels x input channels)
and W is N_i x N_o.

- Pixel row w of the IFM lives in H bank `w % 8`, at offset
  `(w / 8) * N_i + i`.
- Weight column o lives in V bank `o % 8`, at offset `(o / 8) * N_i + i`.
- A tile is 8 pixels x 8 output channels. It takes N_i cycles. In cycle t,
  row r receives IFM element t of its pixel, and column c receives weight t
  of its output channel. Every PE does one MAC.
- The H-AGU address is `tid_r*N_i + t_cycle + addr_IFM`.
- The V-AGU address is `tid_c*N_i + t_cycle`.

**DWC, any stride S** (one channel at a time):

- Each PE computes one output pixel. Row r of the array computes output row
  r of the tile.
- Input rows are grouped S at a time, and the groups go round-robin over
  the 8 H banks. A row is `block_w = S*(B_c*8 - 1) + K` words wide.
- The tile runs K wraps, one per kernel row. Each wrap streams
  `(8-1)*S + K` input pixels along each H-bus.
- PE c uses pixel t of the stream when `t - c*S` lies in `0..K-1`. That
  pixel is multiplied by weight `(t_wrap, t - c*S)`.
- Each column needs a different weight in the same cycle, so the weights
  come down the V-busses, not from the GRF. The K x K weights of the channel
  are copied into every V bank at offset `i*K + j`. The V-AGU of column c
  reads offset `t_wcycle - c*S + t_wrap*K` while that column is active.
- Whether a PE multiplies is fixed by the context word. The context index
  is `t_wcycle`, so one wrap-length program serves all K wraps. What changes
  from wrap to wrap is the address the AGUs produce.

**DWC, S = 1 with operand reuse**:

Each PE again owns one output pixel and holds one input pixel in register 0.
The window slides over the array instead of being re-read:

- **Prologue and expand-east.** Column 7 takes a new pixel from the H-bus
  each cycle, and every other PE takes its east neighbour's `OutA`. After
  7 cycles the first kernel row is in place. From then on every cycle is
  also a MAC with GRF weight `(0, j)`.
- **Shift-south.**
  - At the start of kernel row i, every PE takes its south neighbour's
    operand.
  - The bottom row takes a pixel from its own V-bus.
  - The V-MEM therefore holds, for each tile, the K-1 extra pixel rows below
    the tile, stored column by column. The copy is made by the host.
- **Expand-west / expand-east.** Odd kernel rows run from east to west, with
  column 0 reading the H-bus. Even rows run from west to east.
- **Load count.** The tile loads for `8 - 1 + K*K` cycles. Only the edge
  column that is reading the H-bus and, in shift-south cycles, the bottom row
  read memory. Every other operand comes from a neighbour.
- **Input layout.** Input rows go round-robin over the 8 H banks and are
  `B_c*8 + K - 1` words wide.
- **H-AGU column.** Within a row the H-AGU produces `t_wcycle` for kernel
  row 0, `K-1-t_wcycle` for odd rows, and `8-1+t_wcycle` for even rows.

### Stores and the MAU

All three mappings write the outputs of a tile back the same way:
- In write-back step j, column j drives its `OutReg` onto its row's H-bus.
- Output row y of the block lives in H bank `y % 8`, at offset
  `addr_OFM + (y/8)*8*B_c + x`.

The *memory access unit* (MAU) of each bus merges three kinds of request
into one port. In priority order they are:
1. the store of the write-back phase;
2. an addressed load offered by a PE (`ab`);
3. the AGU's streamed load.

The MAU also drives read data onto the bus only when the context asks for it.

The H crossbar sends each MAU's request to the bank its address names. It
also returns the read data a cycle later. In the mappings every row uses
its own bank, except that DWC rows wrap round the banks. An assertion
reports two requests to one bank in one cycle.

## Pipeline timing

Every step of a tile takes two cycles, overlapped:

```
cycle t   : controller presents step t -> AGUs compute addresses -> bank read issued
            context of step t read from the configuration memory
cycle t+1 : bank data on the busses, PEs execute context t
            (a store of step t is written now, with the address the MAU registered in cycle t)
```

The controller adds one idle cycle at the end of every tile. In that cycle
the last store leaves the pipeline before the next tile's first load uses
the same bank port. A tile therefore takes:

| mapping | cycles per tile |
|---|---|
| PWC | N_i + 8 + 1 |
| DWC, stride S | K*((8-1)*S + K) + 8 + 1 |
| DWC, S = 1 | (8 - 1 + K*K) + 8 + 1 |

For a block of B_r x B_c tiles, the time from `start` to `done` is:

```
1 + (2 if the GRF is refilled) + B_r*B_c*tile
```

The testbenches check this count.

A layer is a sequence of such blocks:
- **PWC.** There are `ceil(N_w/(8*B_r)) * ceil(N_o/(8*B_c))` blocks for
  each of the N_h image rows.
- **DWC.** There are `ceil(N_h/(8*B_r)) * ceil(N_w/(8*B_c))` blocks for
  each channel.

The host's data movement between blocks is not included in these counts.
It can overlap with computation through the DMA port.

For example:
- A 2x2-tile PWC block with N_i = 24 takes 133 cycles.
- A DWC channel with K = 3, S = 1 and B_c = 2, including the GRF refill,
  takes 53 cycles.

## Controller and host interface

`rtl/cgra_controller.sv`, `rtl/np_cgra_top.sv`

The host programs one block as follows:
1. Write the contexts with `cfg_we`/`cfg_waddr`/`cfg_wdata`.
2. Write the weights into the weight buffer with `wb_*`.
3. Write the data into H-MEM and V-MEM through the DMA port (`dma_*`).
4. Pulse `start` with a `kernel_desc_t`. Its fields are:
   - the mode;
   - N_i, K and S;
   - B_r and B_c;
   - `addr_ifm`, `addr_ofm` and `addr_vin`;
   - `load_grf` and the weight-buffer entry.
5. Wait while `busy` is high. `done` pulses once at the end.

The controller loads the GRF first, if the descriptor asks for it (two
cycles). It then walks the tiles, with `tid_c` fastest. For each tile it
runs the wraps, the write-back wrap and the idle cycle.

It fetches these contexts:

| mapping | while loading | write-back step j |
|---|---|---|
| PWC | context 0 | context 1+j |
| DWC, any S | `t_wcycle` | `(8-1)*S+K + j` |
| DWC, S = 1 | `t_cycle` | `8-1+K*K + j` |

The programs are therefore small. PWC needs 9 contexts. DWC with K = 3
needs 24 with S = 1 and 25 with S = 2.

`mac_mode` selects the MAC mode. It is a top-level input rather than a
context bit, because a whole kernel runs in one mode.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For
example, for the full-size end-to-end run:

```
RTL="rtl/npcgra_pkg.sv $(ls rtl/*.sv | grep -v npcgra_pkg)"
verilator --binary --timing -Wno-fatal -Irtl -Itb \
  $RTL tb/tb_layout_pkg.sv tb/tb_np_cgra_top.sv \
  --top-module tb_np_cgra_top -o sim && ./obj_dir/sim
```

The layer-sequence test also needs its host model:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
  $RTL tb/tb_layout_pkg.sv tb/tb_dsc_runner.sv tb/tb_mobilenet_dsc.sv \
  --top-module tb_mobilenet_dsc -o sim && ./obj_dir/sim
```

For a single block, use that block's testbench and module files. The
package files come first. `tb_layout_pkg.sv` is needed by the AGU,
controller, top and workload testbenches.

`tb_np_cgra_top` runs the 8x8 array with every default parameter through
five scenarios:
1. PWC with 2x2 tiles and N_i = 24.
2. DWC with K = 3, S = 2 (the any-stride mapping).
3. DWC with K = 3, S = 1 on two channels. The second channel is prefetched
   over the DMA port while the first one runs, then the GRF is refilled and
   the second channel runs.
4. PWC in MUL/ALU mode.
5. Addressed loads through the crossbar.

Every output is compared with a reference convolution computed in the
testbench, and so is every cycle count. The test also counts how often
each mechanism was used:
- MAC and MUL/ALU operations;
- operand reuse;
- GRF broadcasts;
- crossbar routing;
- V-bus shift-south loads;
- stores;
- addressed loads;
- DMA traffic during a run;
- GRF refills.

Any mechanism that never happened counts as a failure.

`tb_mobilenet_dsc` runs a small depthwise separable network, layer after
layer, with the testbench acting as host. The layers are those that follow
the first convolution of MobileNet V1, at a 16x16 image size:
1. DWC 3x3, S = 1, on 4 channels. Each channel is a block of 2x2 tiles, and
   the next channel is prefetched while the current one runs. The GRF is
   refilled from the weight buffer for even channels. For odd channels the
   host writes it directly.
2. PWC from 4 to 16 channels, one block per image row.
3. DWC 3x3, S = 2, on 16 channels, from 16x16 to 8x8.

The same three layers also run on a second instance configured as a 4x4
array. Every block size and latency follows from R and C.

Between layers the host reads the results through the DMA port. It then
writes them back in the next mapping's layout. Every output of every layer
is compared with a reference, and so is every block latency.

`tb_alexnet_im2col` runs AlexNet convolution layers as matrix products.
The host builds the im2col rows, so each output pixel becomes one row of
`C_in*K*K` values. The test runs one 8x8 tile of conv1 (N_i = 363) and one
of conv3 (N_i = 2304). conv3 nearly fills a memory bank. Both are compared
with a direct convolution.

## Where this design departs from the published NP-CGRA

The following points are this design's own choices or differences:

- **Pipeline and idle cycle.** The published schedule is described
  per cycle of the PE array. Here each step has one cycle of address and
  read before it and an idle cycle at the end of each tile, so a tile is one
  cycle longer than the bare count. The AGU store address is counted from 0
  in each write-back step, without the pipeline offsets of the published
  listing.
- **DWC S = 1 tile length.** The published address listing for this
  mapping implies a tile of `1 + 2*N_c + K*K` cycles. This design takes
  `2*N_c + K*K` cycles: load, write-back and the idle cycle.
- **Instruction encoding.** The field names of the PE instruction come
  from the published format. The field widths, the opcode list and the
  operand-source codes are this design's own.
- **Global bits.** The published context is 2312 bits wide, 36 bits for
  each of the 64 PEs plus 8 global bits. The meaning given here to each
  global bit (GRF index, `h_ld`, `v_ld`, `h_st`, one spare) is this design's
  own.
- **Addressed loads (`ab`).** These go to H-MEM only. None of the three
  convolution mappings needs them. The end-to-end test checks them
  separately: each row builds an address with ALU operations and reads a
  word from another bank through the crossbar. The data comes back on the
  H-bus for the context that follows the one with `ab` set, and that
  context must have `h_ld` set.
- **DWC with S = 1.** The V-MEM layout of the shift-south pixels, and the
  H-AGU column formula for kernel sizes other than 3, are derived here.
- **DWC base address.** DWC loads add `addr_IFM`, so two channels can sit
  in H-MEM together. This is what allows the prefetch.
- **Not included.** The DMA engine, external memory and host processor are
  not part of this RTL. Their signals are brought out as the host write
  ports and the DMA port of each bank.
- **Block-level work only.** The controller runs one block per `start`.
  Splitting a layer into blocks, channels and partial sums is left to the
  host.

## Capacity at the default size

| layer | fits? | why |
|---|---|---|
| MobileNet V1 DWC 3x3, S = 1, 112x112x32 | yes | A block of 4x14 tiles uses 1018 words per H bank. This doubles to 2036 with the next channel prefetched (2496 available). It needs 24 contexts. |
| MobileNet V1 PWC 112x112, 32 -> 64 | yes | One image row per block uses 1344 words per H bank and 256 per V bank. It needs 9 contexts. |
| MobileNet V1 DWC 3x3, S = 2, 112 -> 56 | yes | A channel uses 2200 words per H bank, which leaves no room to prefetch. It needs 25 contexts. |
| PWC with N_i up to 1024 (MobileNet V1/V2) | yes | V-MEM holds 2 x N_i words per bank. |
| AlexNet layers as matrix multiplications, N_i up to 2304 | yes | Just under the 2496-word bank. One tile of conv1 and one of conv3 are simulated. |

The main limit is the 32-entry configuration memory. DWC with S = 1 needs
`2*8 - 1 + K*K` contexts, so K = 5 does not fit (40 contexts) and K = 3 does.
The array size R x C is a parameter. 8x8 and 4x4 have been simulated.

## Files

`rtl/`:
- `npcgra_pkg` holds the constants and types.
- The datapath is `dual_mode_mac`, `pe` and `pe_array`.
- The memories are `mem_bank`, `config_memory`, `weight_buffer` and `grf`.
- Addressing is `h_agu`, `v_agu`, `mau` and `mem_crossbar`.
- Control is `cgra_controller`.
- The top level is `np_cgra_top`.

`tb/` holds one `tb_<module>` per module, plus the following:
- `tb_layout_pkg` contains the data layouts and context program helpers
  shared by the tests.
- `tb_mobilenet_dsc` runs the layer sequence described above.
- `tb_alexnet_im2col` runs the AlexNet tiles described above.
- `tb_dsc_runner` is the host model that `tb_mobilenet_dsc` uses, once per
  array size.
