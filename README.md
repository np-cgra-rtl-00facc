# NP-CGRA: a CGRA extended for depthwise separable convolution

A coarse-grained reconfigurable array (CGRA) is a grid of small ALUs ("PEs")
whose operations and interconnect are reprogrammed every cycle from a context
memory. A conventional CGRA runs light-weight neural networks (MobileNet-style
depthwise separable convolution) poorly. Its PEs do a multiply *or* an add per
cycle. It has one memory port per row, and the PEs spend cycles computing
addresses. Operands that several PEs need in turn must be re-read or routed
through the ALUs.

NP-CGRA keeps the CGRA model and adds a few generic features:

* **Crossbar-style memory busses.** Local memory is split into H-MEM and
  V-MEM. H-MEM bank *r* drives a horizontal bus (H-bus) seen by every PE of
  row *r*. V-MEM bank *c* drives a vertical bus (V-bus) seen by every PE of
  column *c*. One read therefore feeds a whole row or column. An 8x8 array
  doing matrix multiplication gets one new operand pair per PE per cycle from
  only 16 reads.
* **Streamed load-store.** Address generation units (AGUs) produce the
  addresses, so no PE cycle is spent on addresses.
* **Dual-mode MAC.** A mode bit chains the multiplier into the adder, giving
  a single-cycle multiply-accumulate. The bit is set once per application.
  With chaining off, the critical path is shorter and MUL and ADD are
  separate operations.
* **Operand reuse network.** This is an input-to-input network. A PE can pass
  the operand it is using this cycle (its "OpA") to a neighbour's register
  file, and still do its own work. A sliding window can therefore move across
  the array without re-reading memory.
* **Global register file (GRF).** This is a 9-entry register file that
  broadcasts one weight to all PEs. Its index comes from the context word.
  It is filled from a small **Weight Buffer** or directly by DMA.

This repository is synthesizable SystemVerilog for the whole accelerator core,
from the PE up to the top level with its memories. It also has self-checking
testbenches that run pointwise and depthwise convolution tiles end to end.

## Block structure

```
npcgra_top
 ├─ npcgra_controller      context sequencer: prologue / loop body x N / epilogue
 ├─ npcgra_config_mem      32 contexts x 2312 bits
 ├─ npcgra_agu  x4         H-load, V-load, H-store, V-store address generators
 ├─ npcgra_local_mem x2    H-MEM and V-MEM: 8 banks x 2 sets x 2496 x 16 bit
 ├─ npcgra_weight_buffer   144 x 64 bit, 64 GRF copies
 ├─ npcgra_grf             9 x 16 bit, single port, broadcast read
 └─ npcgra_pe_array        8 x 8 PEs, mesh + operand reuse network + busses
     └─ npcgra_pe x64
         └─ npcgra_alu     dual-mode MULT+ALU
npcgra_pkg                 sizes, opcodes, MUX encodings, context word types
```

Default sizes: 8x8 PEs, 16-bit words, 500 MHz target. H-MEM and V-MEM are
39 KB each per set, with two sets each (156 KB in total). The configuration
memory is 9248 bytes (32 contexts x 2312 bits) and the Weight Buffer is 1152
bytes.

## The processing element

Each PE has two operand MUXes:

* **MUX A** reads one of:
  * the Out registers of the north, south, east and west neighbours;
  * its own Out register;
  * registers R0-R3;
  * its H-bus or its V-bus.
* **MUX B** reads the same sources, plus a 16-bit constant from the context
  and the GRF word.

The MULT+ALU result goes into the Output REG ("Out"). Every operation except
`OP_NOP` writes Out. Out is also the accumulator of `OP_MAC`: with chaining
on, `OP_MAC` computes `Out + A*B`.

The reuse extension works like this:

* The MUX A output is brought out as `opa`.
* A reuse MUX picks the `opa` of the N, S, E or W neighbour.
* A register-file MUX writes either that value or the ALU result into R0-R3.

A PE can therefore compute with R0 while loading R0 with its neighbour's
operand for the next cycle. That is the whole sliding-window mechanism.

The operations are add, sub, mul, mac, and, or, xor, shift left, arithmetic
shift right, signed max and min, and pass A or B. Arithmetic wraps around at
16 bits. The product keeps its low 16 bits, and no fixed-point scaling is
built in. With chaining off, `OP_MAC` returns just the product, so software
issues `OP_MUL` and `OP_ADD` separately.

## The context word

Each cycle one 2312-bit context is applied: 36 bits for each of the 64 PEs
plus 8 global bits. `npcgra_pkg::ctx_t` gives the layout. `pe[r][c]` is the
PE in row r, column c. Row 0 is the north edge and column 0 the west edge.

| PE field   | bits | meaning |
|------------|------|---------|
| `op`       | 4    | `op_e` operation |
| `sel_a`    | 4    | MUX A source (`src_e`, `SRC_N` .. `SRC_VBUS`) |
| `sel_b`    | 4    | MUX B source (`src_e`, all 13) |
| `rf_we`    | 1    | write R[`rf_waddr`] |
| `rf_waddr` | 2    | register written |
| `rf_wsel`  | 1    | 0: ALU result, 1: neighbour OpA through the reuse MUX |
| `reuse`    | 2    | reuse MUX: N, S, E, W neighbour |
| `st_en`    | 1    | this PE's Out is the store word of its row and column |
| `rsvd`     | 1    | unused |
| `konst`    | 16   | MUX B constant |

| global field | bits | meaning |
|--------------|------|---------|
| `grf_idx`    | 4    | GRF entry broadcast this cycle |
| `h_ld`       | 1    | streamed load: every H-MEM bank reads the H-load AGU address |
| `v_ld`       | 1    | streamed load on the V side |
| `h_st`       | 1    | every H-MEM bank *r* stores row *r*'s store word at the H-store AGU address |
| `v_st`       | 1    | every V-MEM bank *c* stores column *c*'s store word |

### Timing of a kernel

* The controller issues context *k* in cycle *t*. The word leaves the
  configuration memory registered, so it executes in cycle *t+1*.
* A load flag in a context reads memory in the cycle that context executes.
  The word is on the bus in the next cycle and stays there until the next
  read. **Loads are therefore programmed one context ahead of their use.**
* A store writes the current value of Out of the PE selected by `st_en`.
  Only one PE per row (or column) should have `st_en` set; several are
  OR-combined.
* Each AGU walks `base + i*s0 + j*s1`. The inner index `i` wraps at `n0`.
  Every AGU restarts at `base` on `start`, and steps once per context that
  uses it.
* A kernel has three parts. The prologue is contexts `0 .. loop_start-1`.
  The loop body `loop_start .. loop_end` repeats `loop_cnt` times. The
  epilogue is `loop_end+1 .. last_pc`. There is no gap between contexts.
* `done` pulses in the cycle after the last context executed, which is
  (contexts executed + 1) cycles after `start`.

## Mappings

The three kernels below are what the testbench runs. They show how the
features combine.

### Pointwise convolution / matrix multiplication (output stationary)

PE (r,c) accumulates `Y[r][c] = sum_i X[r][i] * W[i][c]`. At step *i*, H-bus
*r* carries `X[r][i]` and V-bus *c* carries `W[i][c]`. Bank *r* of H-MEM
holds row *r* of X and bank *c* of V-MEM holds column *c* of W, both at
addresses 0..Kd-1. Both load AGUs step by 1. The program has 12 contexts:

* a load-only context;
* one `MUL` (starts the sum);
* a one-context loop body `MAC` repeated Kd-2 times;
* a last `MAC`;
* eight store contexts, one per column.

Every PE does a MAC in every cycle of the Kd-cycle compute phase, so
utilisation is 100%. The kernel takes Kd+9 contexts.

### Depthwise convolution, stride 1 (operand reuse + GRF)

Each PE (r,c) accumulates `y(r,c) = sum_{a,b} w(a,b) x(r+a, c+b)` for one
channel. All PEs use the same weight at the same time, so the weight comes
from the GRF (`SRC_GRF`, index in the context). The 3x3 weights are taken in
snake order: w00 w01 w02, w12 w11 w10, w20 w21 w22. After each step every PE
needs the operand its neighbour just used. Only the edge row or column needs
a new word:

| phase | steps (K=3)     | R0 refilled from | new data enters at | via |
|-------|-----------------|------------------|--------------------|-----|
| prologue | Nc-1 cycles  | H-bus (column p+1 at cycle p) | all but the first column | H-bus |
| EE (expand east) | w00 w01 w02 | east neighbour | last column | H-bus |
| SS (shift south) | w12 | south neighbour | last row | V-bus |
| EW (expand west) | w11 w10 | west neighbour | first column | H-bus |
| SS    | w20              | south neighbour | last row | V-bus |
| EE    | w21 w22          | east neighbour | last column | H-bus |

The PEs work like this:

* A PE computes with R0, or with the bus if it is on the loading edge.
* In the same cycle it writes R0 with the OpA of the neighbour named by the
  *next* step's phase.
* In the last prologue cycle all PEs except those in the last column shift
  from the east. This lines up the first EE step.

Compute takes Nc-1+K² = 16 cycles. With one load-ahead context and 8 store
contexts the program has 25 contexts.

Every H-MEM and V-MEM bank holds the words its bus delivers, in the order the
bus delivers them. With K=3 that is 14 words per H bank and 2 per V bank per
tile. Some of these words belong to the next input row, so the same IFM word
can appear in two banks. DMA prepares this layout, and the AGUs then just
count up.

### Depthwise convolution, any stride

For stride S, H-bus *r* streams input rows `S*r+a` (a = 0..K-1), one word per
cycle. That is `S*(Nc-1)+K` words per row. PE (r,c) does a MAC only in the K
cycles when its window `S*c .. S*c+K-1` is on the bus; otherwise its context
says `NOP`. Column *c* needs a different weight at each moment, so V-bank *c*
holds `w(a, j-S*c)` at position *j*. The body (17 contexts for S=2, K=3)
repeats once per kernel row through the loop counter. A stride-2 tile takes
1 + 3x17 + 8 = 60 contexts.

## Host / DMA interface of `npcgra_top`

DMA, external memory and the host CPU are not part of this RTL. Their access
points are plain ports:

* `host_cfg_*`: write 32-bit slice `host_cfg_slice` (0..72) of context
  `host_cfg_addr`. Slice s holds bits 32s+31..32s of `ctx_t`.
* `host_reg_*`: write a register:

  | address | register |
  |---------|----------|
  | 0 | `loop_start` |
  | 1 | `loop_end` |
  | 2 | `last_pc` |
  | 3 | `loop_cnt` |
  | 4 | bit 0: MAC chaining; bit 1: memory set used by the array |
  | 5..8 | H-load AGU `base`, `n0`, `s0`, `s1` |
  | 9..12 | V-load AGU, same four fields |
  | 13..16 | H-store AGU, same four fields |
  | 17..20 | V-store AGU, same four fields |

  After reset, MAC chaining is on, the array uses set 0 and `loop_cnt` is 1.
* `host_mem_*`: read or write one word of H-MEM (`vsel=0`) or V-MEM
  (`vsel=1`), in any set and bank. Read data comes one cycle later. The
  intended use is double buffering: DMA works on one set while the array
  uses the other.
* `host_wb_*`: write a 64-bit Weight Buffer row. Pulse `host_wb_load` with a
  copy number to move GRF copy *c* into the GRF. Copy *c* is 16-bit words
  9c..9c+8, four words per row, low word first. The transfer takes 10 cycles,
  and `wb_busy` is high during them.
* `host_grf_*`: write a GRF entry directly. An assertion flags a direct write
  during a Weight Buffer transfer.
* `start`, `busy`, `done`.

## Where this RTL goes beyond or departs from the published architecture

The published description gives these:

* the features above;
* the PE's block diagram (its MUX sources and the reuse network);
* the array and word sizes;
* the memory, configuration and Weight Buffer sizes;
* the 36-per-PE + 8 global context bits;
* the three mappings.

It does not give the insides of the dual-mode MAC, the AGU algorithm, the
controller, the bit layout of the context word or the DMA. The following are
this design's own choices:

* **Context field layout, opcode list and encodings.** Only the bit counts
  are fixed.
* **Dual-mode MAC.** Chaining off cuts the multiplier-to-adder path, and
  `OP_MAC` then gives the product. The mode bit is a register, not a clock
  setting. The clock-frequency benefit is a timing matter and is not visible
  in RTL.
* **Arithmetic width.** Products and sums wrap at 16 bits. No rounding,
  saturation or fixed-point shift is built in.
* **AGU.** A two-level strided pattern. Each AGU keeps its own iterators,
  whereas the published design shares iterators in the controller. Any
  irregular access order is handled by the DMA data layout.
* **Controller.** A single hardware loop (prologue / body x N / epilogue)
  over at most 32 contexts. The host restarts it for each tile. There is no
  outer tile loop in hardware.
* **Memory.** Each H-MEM/V-MEM bank is modelled as an array with one array
  read, one array write and one host port per cycle. All banks on a side
  share one AGU address. In silicon this would map onto SRAM macros.
  "39 KB (x2 sets)" is read as two ping-pong sets.
* **Array edges.** Neighbour inputs past the edge read zero; there is no
  torus.
* **Stores.** Out is stored through the H or V bus, from the PE marked by
  `st_en`. This takes Nc cycles per output tile.
* **GRF size.** 9 entries, one 3x3 kernel. This follows from the Weight
  Buffer holding 64 GRF copies in 1152 bytes.
* **Reset.** Synchronous, active-low reset clears Out, R0-R3, the GRF, the
  bus registers and the control state. Memory contents are not reset.

The array size (8x8), word width and GRF size are `npcgra_pkg` constants.
The smaller 4x4 array used in one comparison is not provided as a ready-made
configuration. The memory depth, context count and Weight Buffer depth are
parameters of `npcgra_top`.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_npcgra_alu` | every opcode against a reference model, in both MAC modes |
| `tb_npcgra_pe` | all MUX sources, OpA, NOP hold, a MAC sequence, RF writes from the ALU and from each reuse direction |
| `tb_npcgra_pe_array` | an 8x8 matrix tile in 9 cycles, store collection, reuse in all four directions with zero edges, the mesh |
| `tb_npcgra_grf` | reads, single-port behaviour, out-of-range indices |
| `tb_npcgra_weight_buffer` | GRF copies 0..63, word order, the 10-cycle busy time, a load ignored while busy |
| `tb_npcgra_local_mem` | host and array ports, both sets, held bus data, stores |
| `tb_npcgra_agu` | random strided patterns against `base + i*s0 + j*s1` |
| `tb_npcgra_config_mem` | slice writes, registered reads, idle output |
| `tb_npcgra_controller` | context order and cycle timing for several loop shapes |
| `tb_npcgra_top` | the full-size design running the kernels below |

`tb_npcgra_top` runs the full-size design (default parameters) through these
kernels:

* pointwise tiles with inner sizes 16, 40 and 9, the last with chaining off;
* a pointwise tile with inner size 2304, the im2col row length of AlexNet's
  third convolution layer, which nearly fills a 2496-word bank;
* one tile in memory set 1;
* stride-1 depthwise tiles, with the GRF loaded once from the Weight Buffer
  and once directly;
* a stride-2 depthwise tile.

It checks every output word and the exact cycle count of each kernel:

* Kd+10 for pointwise;
* 26 for stride 1, which includes the 16-cycle compute phase;
* 61 for stride 2.

It also counts how often each mechanism occurs and fails if one never
happens. The mechanisms are H and V loads, stores, reuse from the east, south
and west, the GRF broadcast, chained and unchained MAC, memory set 1, loop
repetition, the Weight Buffer transfer and the direct GRF write.

`tb_npcgra_mobilenet` is a workload test. It runs the first depthwise
separable block of MobileNet V1 (width 1.0, 224x224 input) at full size on
the full-size design:

* a stride-1 3x3 depthwise layer, 112x112x32;
* a 32-to-64-channel pointwise layer;
* a stride-2 3x3 depthwise layer down to 56x56x64.

The host acts as the DMA and uses the two memory sets as ping-pong buffers.
While a kernel runs on one set, the host reads back the previous tile and
writes the next tile into the other set. All 1.4 million outputs and every
kernel's cycle count are checked. The run takes about 4 million cycles, most
of them host transfers over the one-word-per-cycle host port.

One sizing detail shows up here. The stride-2 weight layout needs 51 words
per channel in each V-MEM bank, so one bank holds at most 48 channels of it;
the test reloads the weights per channel.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_npcgra_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/npcgra_pkg.sv tb/tb_npcgra_top.sv -o sim
./obj_dir/sim
```

Replace `tb_npcgra_top` with any other testbench name. Each unit test
finishes in well under a second, and the MobileNet test in about 15 seconds. The testbenches use only `$urandom` for stimulus.
