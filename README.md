# Three accelerators for dense, sparse and vision AI workloads

AI models are not all alike. Some are dense matrix products with every weight used, as in convolutions and the transformation step of a graph network. Some are extremely sparse, as in graph aggregation and sparse matrix–vector products, where more than 99.8 % of the adjacency matrix is zero. Others, like vision transformers on event cameras, need small, quantised matrix engines close to the sensor. This repository holds synthesizable SystemVerilog for three accelerators, one for each of these cases, placed side by side under one top level:

1. **Heterogeneous accelerator engine** (`hetero_accel`). It runs dense products in memory and sparse aggregation on SIMD lanes. The dense engine is a *latch-based in-memory-compute* (LIMC) core: weights sit in the storage cells, and activations are streamed in bit-serially through a radix-4 Booth encoder. The engine has two copies of the weight array (ping and pong), so one copy is loaded while the other computes. Sparse work (graph aggregation, SpMV) goes to a 16-row × 128-lane SIMD core that walks a list of edges. Everything is driven by a small 128-bit instruction set that a host processor places in a global buffer.
2. **GCN aggregation datapath** (`gcn_accel`). This is the aggregation side of a multi-core graph-convolution accelerator. It exploits the symmetry of undirected graphs: for a pair of transposed adjacency tiles it processes only one. It adds features along the row (horizontal) and along the column (vertical) of each edge. This gives both tiles' partial outputs from one pass over the edges.
3. **Vision-transformer building blocks** (`os_systolic_array`, `maxpool_engine`). These are the patch-embedding systolic array (32 × 24, 8-bit activations × 4-bit weights, output stationary) and the 4 × 4 max-pool engine of a small two-die ViT for event-camera object detection.

`ai_accel_suite` instantiates all three. They share only `clk` and the active-low asynchronous `rst_n`. Each brings its own ports out with a prefix: `hx_`, `gcn_` or `vit_`.

---

## 1. Heterogeneous accelerator engine

### 1.1 Data path at a glance

```
 host port ──► global buffer (512 KB, 128-bit words) ◄──► DMA ◄──► LIMC weights (ping / pong)
                     ▲                                   │ ├──► activation buffer (2 halves)
                     │                                   │ ├──► sparse buffer (COO edges)
      instruction buffer ◄───────────────────────────────┘ ├──► intermediate buffer (node features)
            │                                              └──► output buffer
            ▼
     controller ──► execution unit ──► feeder (scatter-gather, rearrange, select, 2-entry shift reg)
                           │                     └──► LIMC core (16 macros, Booth, 5-level adder tree)
                           │                                   └──► requantise ──► IB or OB
                           └──► SIMD core (16 PE rows × 128 lanes) ──► shift/ReLU/saturate ──► OB
```

| module | role |
|---|---|
| `hx_pkg` | opcodes, instruction layouts, memory map, COO entry, Booth helpers |
| `hx_ctrl` | copies the program into the instruction buffer, then issues instructions in order; decides when a Load may overlap computation |
| `hx_dma` | Load/Store: one 128-bit word per cycle, N words in N+1 cycles |
| `hx_exec` | runs Matmul/Conv (feeder → LIMC → requantise → write) and Agg (SIMD pass, then drain) |
| `hx_feeder` | turns activation-buffer words into 30-byte LIMC iterations |
| `limc_core`, `limc_macro`, `limc_pp_tree` | the in-memory-compute core |
| `simd_core` | sparse aggregation |
| `hx_act_buffer`, `hx_ib`, `hx_sb`, `hx_ram` | buffers |

### 1.2 The LIMC core (the hardest part)

The core has 16 macros per copy, one per output column; 16 columns fill the 128-bit bus. Each macro stores 450 8-bit weights as 30 banks × 15 rows. Weight *k* of a column lives in bank *k*/15, row *k*%15. A dot product of length 450 is therefore computed in **15 iterations**. In iteration *i*, each of the 30 banks reads its row *i* and is given one activation byte. The feeder arranges the bytes so that bank *b* receives activation *b*·15+*i*.

Inside an iteration the activations are processed bit-serially, radix-4 Booth style. One shared encoder looks at 3-bit windows of each activation. Each window selects 0, ±W or ±2W as the partial product of its bank. The 30 partial products enter a pipelined binary adder tree: 5 register levels, 32 leaves. The result is shifted by 2 bits per digit and accumulated. An iteration takes:

* **4 cycles** in 8-bit mode (mode `00`/`11`, 4 Booth digits);
* **2 cycles** in the 4-bit modes (`01` = low nibble of each weight, `10` = high nibble);
* **1 cycle** when all 30 activations are zero (*coarse skip*). If such an iteration closes a vector, one zero beat is pushed through the tree so the result still emerges.

A digit whose window is `000` or `111` contributes zero. It is counted as a *fine skip*. In silicon this is the place where the bank's switching is gated; here it only updates the counter.

The next iteration is accepted during the last digit of the current one. Iterations therefore follow each other without gaps. The result of a vector (`out_valid`, 16 signed 32-bit sums) appears clog2(30) + 1 = 6 cycles after its last digit. `cmp_bank` selects the copy used for computation. Writes go to either copy at any time. An assertion forbids writing the copy that is computing while work is in flight.

The storage cells are edge-triggered registers, not latches. At a clock edge they behave the same, and flip-flops keep simulation and static timing simple.

### 1.3 Feeding the LIMC

`hx_feeder` produces one vector at a time. It reads the vector's bytes into a 450-byte line register. A Matmul row of A occupies 32 words, of which the first 450 bytes are used. A Conv vector is gathered from a kernel window: byte *j*·`chans`+*c* is channel *c* of window position *j* = *ky*·*k*+*kx*. Bytes beyond *k*²·`chans` are zero. The line register is then cut into 15 iterations of 30 bytes. These pass through a 2-entry shift register whose *token* counts the full entries (0–2). The LIMC takes an entry when it is ready. An assertion checks the token never exceeds 2.

### 1.4 Instruction set and memory map

Every instruction is 128 bits and carries a 4-bit opcode in bits [3:0]:

| opcode | instruction | fields above the opcode (LSB first) |
|---|---|---|
| 1 | Load | src[35:4], dst[67:36], count[77:68] (words), rest 0 |
| 2 | Store | same as Load |
| 3 | Matmul | src, dst, count (vectors), mode[79:78], bank[80], relu[81], shift[85:82] |
| 4 | Conv | as Matmul, plus kernel[89:86], stride[93:90], in_width[103:94], chans[108:104] |
| 5 | Agg | src = first sparse-buffer entry, dst, count = edges, relu, shift, in_width = nodes to drain |

Addresses are 32-bit word addresses. Bits [31:16] select the memory:

| region | memory | notes |
|---|---|---|
| 0 | global buffer | 32768 words |
| 1 | LIMC weights | ping at +0…449, pong at +512…961; byte *m* of a word goes to macro *m* |
| 2 | activation buffer | 2 halves of 1024 words, selected by address bit 10 |
| 3 | intermediate buffer | word node·8 + group: 8 groups of 16 features per node |
| 4 | sparse buffer | 4 COO entries per word |
| 5 | output buffer | 2048 words |
| 6 | instruction buffer | 256 words |

A COO entry is `{val[31:24] signed, dst[23:12], src[11:0]}`.

Matmul and Conv results are requantised to bytes: an arithmetic shift right by `shift`, then ReLU if `relu` is set, then saturation to −128…127. Each result vector becomes one word. When the destination is the intermediate buffer, row *r* is written to node *r*, group 0 (word dst + 8*r*). A following Agg can then aggregate the transformed features directly.

**Ordering rules.** Instructions issue in program order. Store, Matmul, Conv and Agg wait until the DMA and the execution unit are idle. A Load normally waits as well. It may start while a computation runs only if it writes the LIMC copy that is *not* in use (bit 9 of the address differs from the instruction's `bank`), or the activation-buffer half that is not being read. This is the ping-pong overlap: `LD LIMC(ping); LD AB; Matmul(ping); LD LIMC(pong); Matmul(pong)` hides the second weight load behind the first Matmul. `n_overlap` counts such Loads.

**Running a program.** While `busy` is low, the host writes data and the program into the global buffer through `host_*`. It then pulses `cfg_start` with the program's address and instruction count. `done` pulses when the last instruction has completed. Results are read back through `host_raddr`/`host_rdata`, with one cycle of latency.

### 1.5 SIMD core

The core has 16 PE rows × 128 lanes. Node *n* belongs to PE row *n* mod 16 and to scratch-pad entry *n*/16, with 64 entries per row for a 1024-node tile. The core takes one COO edge per cycle. It reads the source node's 128 features from the intermediate buffer. It multiplies them by the edge value (or by 1 when `scale_en` is low) and adds the product into the destination's scratch-pad entry. The pipeline is 3 stages deep. A pass over *N* edges ends with `done` *N*+3 cycles after `start`. Results are read combinationally, with a shift, optional ReLU and 8-bit saturation. `hx_exec` drains `in_width` nodes × 8 words into the output buffer.

---

## 2. GCN aggregation datapath

A graph is cut into tiles of 1020 × 1020 adjacency entries. The destination nodes of a tile are split evenly over **M = 6 cores**. Each core has an edge buffer, a local buffer and **R = 10 PE rows of C = 66 lanes**. Source features live in a memory with one bank per core; node *n* is stored in bank *n* % 6 at address *n* / 6.

The edge buffer of a core is read one 32-bit entry per cycle:

| entry | meaning |
|---|---|
| `FFFF_xxxx` | configuration; bit 0 = 1 for a non-diagonal tile (vertical aggregation on) |
| `EFFF_aaaa` | load address *a* of every bank (nodes 6*a* … 6*a*+5) into the local buffer (one extra cycle) |
| `FFFF_FFFF` | end of list |
| `rrrr_cccc` | edge from node *c* (source) to node *r* (destination) |

Adjacency entries are ones, so aggregation is addition. An edge adds source *c*'s features into destination *r* (horizontal). On a non-diagonal tile it also adds *r*'s features, taken from the core's own vertical-feature memory, into node *c* (vertical). The vertical sum is the horizontal aggregation of the transposed tile, which therefore never has to be processed.

Each addition occupies a PE row for **4 cycles**. The scheduler assigns a free row to each edge, or two rows on a non-diagonal tile. If none are free it **stalls** and counts the stall. When a row finishes, it adds its vector into the horizontal or vertical partial-output store. At most one of each finishes per cycle, so there are no write conflicts. Because one entry is read per cycle, at most 4 rows (diagonal) or 8 rows (non-diagonal) are ever busy. With the default 10 rows the scheduler therefore never stalls; the unit test uses 5 rows to exercise the stall. `done` comes 6 cycles (PE cycles + 2) after the end word is reached.

The vertical partial outputs of all cores belong to the same nodes. `gcn_reduction` sums them, one node per cycle, with optional ReLU and optional accumulation onto an earlier tile's value.

Not built: the transformation mode (the same PE array used as a systolic array), the task scheduler that orders tiles by symmetry, the DMA and the HBM2 interface. Features are written and read through plain ports.

---

## 3. Vision-transformer blocks

`os_systolic_array` is an output-stationary ROWS × COLS array (default 32 × 24). Each step presents one column of A (`a_in`, 8-bit) and one row of B (`b_in`, 4-bit). The array skews them internally. After *K* steps, `acc[r][c]` holds Σ a·b over the steps. `done` pulses ROWS + COLS + 1 cycles after the last step. `clear` zeroes the accumulators.

For patch embedding (kernel 4, stride 4, 2 input channels) the inner dimension is 32. The 64 × 64 patches map to 128 passes of the array.

`maxpool_engine` keeps a running maximum per lane (24 channels, signed 8-bit). It emits the maximum of every 16 accepted values (a 4 × 4 window), one cycle after the 16th.

The window-attention blocks (64 × 24 and 16 × 48 arrays with their control), their memories, and the split of the tiles across two stacked dies are not built.

---

## 4. Simulating

All testbenches are self-checking. Each prints `TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl --top-module tb_ai_accel_suite \
          rtl/hx_pkg.sv tb/tb_ai_accel_suite.sv
./obj_dir/Vtb_ai_accel_suite +verilator+rand+reset+2
```

`-y rtl` lets Verilator find each module in `rtl/<name>.sv`. The package is listed explicitly so it is read first. `-Wno-fatal` keeps the remaining width and unused-bit lint warnings from stopping the build. `+verilator+rand+reset+2` starts every flop and memory at a random value. The designs reset or initialise everything that is read before it is written. Replace the testbench name to run another test.

| testbench | what it checks |
|---|---|
| `tb_ai_accel_suite` | all three designs at default sizes (section 5) |
| `tb_hetero_accel` | the same ten-instruction program on the heterogeneous engine alone |
| `tb_limc_core` | dot products in all four modes, zero iterations, writes to pong while ping computes, exact cycle count |
| `tb_simd_core` | 600 random edges over 1024 nodes, scaled and unscaled, ReLU, *N*+3 latency |
| `tb_hx_feeder`, `tb_hx_dma`, `tb_hx_act_buffer` | address patterns, token, transfer timing, half selection |
| `tb_gcn_agg_core` | diagonal and non-diagonal tiles, stall and no-stall, cycle count |
| `tb_gcn_accel`, `tb_gcn_reduction` | multi-core horizontal outputs, reduced vertical outputs, ReLU |
| `tb_os_systolic_array`, `tb_maxpool_engine` | products and maxima against reference values |

## 5. End-to-end test

`tb_ai_accel_suite` runs the top level with every parameter at its default.

* **Heterogeneous engine.** The program is: load ping weights, load A, Matmul into the intermediate buffer, load pong weights (overlapping), Matmul on pong with ReLU into the output buffer, load a 6 × 6 × 2 map into the other activation-buffer half (overlapping), load 12 edges, Agg with ReLU, 3 × 3 Conv, Store.
* **GCN datapath.** All six cores process a non-diagonal tile.
* **ViT blocks.** A 20-step product runs on the 32 × 24 array, and four max-pool windows are checked.

Every stored value is compared with a reference computed in the testbench. The test fails if any of these mechanisms never happens:

* a Load overlapping computation;
* a LIMC coarse skip or fine skip;
* a full feeder shift register;
* SIMD aggregation;
* GCN two-row edges;
* systolic-array completion;
* max-pool completion.

Because of the arithmetic in section 2, the GCN stall count is required to be zero at 10 rows.

## 6. Departures and open points

* **LIMC.** Radix-4 Booth on signed operands; one digit per cycle; flip-flops instead of latches; the fine skip is counted but does not gate anything.
* **Instruction fields and memory map.** The compute-instruction fields beyond opcode/src/dst/count and the whole memory map are this design's own.
* **Requantisation and cross-chunk accumulation.** Results are requantised to 8 bits after every Matmul, and there is no accumulation across several 450-row weight chunks. Products with an inner dimension above 450, such as 1433-wide graph features, therefore cannot be computed exactly in one pass.
* **Ping-pong cycle counts.** The published cycle counts are not reproduced, because they include host and DMA overheads that are not broken down.
* **SIMD issue rate.** The SIMD core issues one edge per cycle rather than sixteen.
* **Intermediate buffer banking.** The buffer is banked by feature group rather than by node.
* **Buffer sizes.** The activation, output and instruction buffers have sizes of this design's choosing.
* **GCN.** Only aggregation is built. A feature bank answers all cores in the same cycle; conflicts are not modelled.
* **ViT.** Only the patch-embedding array and the max pool are built. The single flip-flop that resynchronises data crossing between the two dies belongs to the physical split and is not modelled.
* **Not modelled at all.** The host processor, bus interconnect, test and clock logic, off-chip memory and analogue pad circuits are outside the RTL.
