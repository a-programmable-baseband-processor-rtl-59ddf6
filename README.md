# Stream baseband processor

A programmable processor for the physical layer of a software defined radio.
A multiuser W-CDMA base-station receiver (channel estimation, multiuser
detection with parallel interference cancellation, Viterbi decoding) is almost
entirely multiply-accumulate work that is highly data parallel, and it needs
about as many additions as multiplications. A conventional DSP has too few
arithmetic units to keep up. This design therefore follows the *stream
processor* model: the algorithms are written as a chain of small **kernels**
that run in SIMD on eight VLIW arithmetic clusters, and the data flows between
kernels as **streams** kept in an on-chip stream register file (SRF) rather than
in a cache.

Every cluster has **three adders and three multipliers**: 24 + 24 units in all.
An earlier arrangement with two multipliers and a divider per cluster left the
divider idle and the adders waiting for the multipliers. Giving each cluster
equal numbers of the two units is the central choice of the design.

```
             host commands                         4 x SDRAM channel
                  |                                        |
          +-------v--------+    xfer     +-----------------v-------+
          |stream_controller|----------->| streaming_memory_system |
          |  (queue, 1 cmd  |            +-----------+-------------+
          |   at a time)    |  kernel                |
          +---+--------+----+----+         +---------v----------+        +-------------------+
              |        |         +-------->|stream_register_file|<------>| network_interface |<--> network
              |        |                   |  8 banks, 1/lane   |        +-------------------+
              |        v                   +---------+----------+
              |  microcontroller ---- instr -->  alu_cluster x 8
              |  (microcode, loops,        (3 adders, 3 multipliers,
              |   stream addresses)         16 registers each)
```

## How a kernel executes

The **microcontroller** holds up to 256 VLIW instructions (`instr_t` in
`sbp_pkg`). While a kernel runs it issues one instruction per cycle, and all
eight clusters execute it on their own data. An instruction has these slots:

| slot | count | what it does |
|---|---|---|
| adder | 3 | `op dst, a, b`: add, sub, min, max, abs, sign (±1.0 in Q15), pass, load immediate, cluster index, shifts, and/or/xor, signed less-than |
| multiplier | 3 | `op dst, a, b`: low word, high word, or Q15 product `(a*b)>>>15` |
| stream in | 1 | read the next word of input stream `sid` (0..7) into `dst` |
| stream out | 1 | write register `src` of every cluster to the next record of output stream `sid` (0..1) |
| control | 1 | `SETC c, imm` loads loop counter c (0 or 1). `LOOP c, target` decrements it and jumps while it is non-zero. `HALT` ends the kernel. |
| imm | 16 bit | immediate for `LDI` and `SETC` |

These timing rules are what a kernel programmer must know:

* Adder and multiplier results are written at the end of the cycle. The next
  instruction can use them. No interlocks exist.
* A stream word lands in its register at the end of the **following** cycle. A
  value read by instruction *t* can first be used by instruction *t+2*.
* If two slots write the same register in one cycle, the later slot wins: stream
  input beats multipliers, and multipliers beat adders. A simulation assertion
  flags this as an error.
* A taken `LOOP` costs no bubble. The slots of the `HALT` instruction still
  execute.

**Streams.** A kernel is launched with eight input and two output base
addresses into the SRF. The SRF has one bank per cluster. Element *e* is in
bank *e mod 8*, row *e div 8*. A *lane* read fetches a whole row, so cluster
*c* gets element *base+8j+c*, and the stream pointer then advances by 8. A
*broadcast* read fetches one element for all clusters and advances by 1. This
gives every cluster a shared vector, such as the received chip vector *r*,
without an inter-cluster network. Output streams are always written a whole row
at a time.

Only one stream read and one stream write are possible per instruction, and that
port is the usual bottleneck. In the matched-filter kernel below, eight reads
feed four multiplies per element. The units are therefore busy only about 11% of
the issued cycles.

## Stream commands and memory traffic

The host never touches the units directly. It posts `cmd_t` commands into the
4-entry queue of the **stream controller** (`cmd_valid`/`cmd_ready`). The
controller runs them strictly in order and one at a time:

| command | unit | fields used |
|---|---|---|
| `CMD_LOAD` / `CMD_STORE` | streaming memory system | `mem_addr`, `inner_cnt`, `inner_stride`, `outer_cnt`, `outer_stride`, `srf_addr` |
| `CMD_KERNEL` | microcontroller | `pc`, `in_base[8]`, `out_base[2]` |
| `CMD_NET_RECV` / `CMD_NET_SEND` | network interface | `srf_addr`, length `inner_cnt*outer_cnt` |

Loads and stores follow a two-level address pattern. SRF element
`srf_addr + o*inner_cnt + i` pairs with external word
`mem_addr + o*outer_stride + i*inner_stride`. This pattern does the data
rearrangements that the receiver chain needs between kernels:

* odd/even column split of the channel matrix: inner stride 2;
* matrix transpose: inner stride equal to the row length, outer stride 1;
* turning a user-major matrix into per-cluster lane streams: inner count 8,
  inner stride equal to the user row pitch, outer stride 1 element.

External memory is four word-interleaved channels. Word *w* is in channel
*w mod 4* at address *w div 4*. Each channel uses a request/acknowledge
handshake: the request is held until `mem_ack` pulses, and read data comes with
the acknowledge. Each channel has its own access slot, so up to four accesses
can be in flight at once. The address generator hands out at most one word per
cycle. The memory used in the testbenches acknowledges two cycles after a
request. With it:

* a unit-stride stream spreads over all four channels and moves one word per
  cycle;
* a stride that is a multiple of four stays on one channel and takes three
  cycles per word.

The layout of the data in external memory therefore decides how expensive a
rearrangement is. Load data goes straight into the SRF's single write port.
When two channels deliver in the same cycle, the extra word waits in its slot.

Because commands do not overlap, the clusters sit idle during every load and
store. `stall_cycles` counts this memory stall time and `kernel_cycles` counts
the time spent in kernels. Letting transfers run alongside kernels would be the
natural next step. It is not built.

## The matched-filter example

`tb/tb_stream_processor.sv` runs equations 6–7 of the multiuser detector end to
end for K = 32 users and spreading length N = 32:

y_i[k] = Re(A1[k]ᴴ r_{i−1} + A0[k]ᴴ r_i),  d_i[k] = sign(y_i[k])

1. Sixteen strided loads rearrange the 2K×N complex channel estimate (row 2k is
   user k's A0 row, row 2k+1 its A1 row) into lane streams. Each stream holds the
   real or imaginary part of A0 or A1 for a group of eight users, one user per
   cluster.
2. For each detection bit, `r_i` (2N words) arrives through the network port.
   The kernel runs once per group of eight users, with `r_{i−1}` and `r_i` as
   broadcast streams.
3. y is stored to SDRAM and d is sent out of the network port.

The kernel loop is 12 instructions per chip: eight stream reads, four Q15
multiplies and four adds. One launch issues 1 + 12N + 2 = 388 instructions,
which is 1552 kernel cycles per detection bit for 32 users. The testbench
compares every y and d with a fixed-point model. It also checks the instruction
and unit-operation counts, and it requires each mechanism to occur: memory wait
states, memory stall time, strided rearrangement, a full command queue,
broadcast and lane reads, loop branches and network backpressure.

## The interference-cancellation example

`tb/tb_pic_workload.sv` runs three stages of parallel interference
cancellation for K = 32 users on three bits at a time:

y_i = y0_i − L d_{i−1} − C d_i − Lᵀ d_{i+1},  d_i = sign(y_i)

Here L and C are the real K×K correlation matrices between neighbouring bits
and within a bit, and the d vectors come from the previous stage. Each cluster
needs row k of L, C and Lᵀ for its own user k. The rows of L and C come from
row-major matrices in SDRAM through a strided load (inner stride K). The rows
of Lᵀ come from the same copy of L with the strides exchanged (inner stride 1,
outer stride K). So the transpose costs one load and no kernel time. The three
decision vectors are broadcast streams. Decisions are ±1.0 in Q15, so every
product is exact.

The loop body is nine instructions per matrix column: six stream reads, three
multiplies, and three accumulations into separate registers. One launch issues
2 + 9K + 5 = 295 instructions, which is 1180 kernel cycles per bit and stage.
The testbench checks every y and d of every stage against a model, and it
checks the final values stored to SDRAM. It also checks that cancellation
changed at least one decision, and it checks the cycle and operation counts.

## The channel-estimation example

`tb/tb_channel_estimation_workload.sv` runs one tracking step of the channel
estimator for K = 32 users and N = 32 chips. b and bo are the newest and the
oldest bit vectors of the estimation window. r and ro are the received vectors
that belong to them.

Rbr' = Rbr + b rᴴ − bo roᴴ,  Rbb' = Rbb + b bᵀ − bo boᵀ,  A' = A − μ(Rbb' A − Rbr')

Every matrix has 2K = 64 rows, and row m is handled by cluster m mod 8. The
correlation-update kernel runs once per group of eight rows. It has two loops
with separate loop counters: one over the complex words of Rbr, where the
conjugate shows up as a subtraction in the imaginary part, and one over Rbb.
Because Rbb' is real, the product Rbb' A treats real and imaginary words of A
alike. So the matrix-product kernel is a 64-term dot product of a row of Rbb'
with a broadcast column of A. A column copy of A is made by a strided load. The
same launch finishes with the iteration update of its one element per cluster,
with μ = 1/16 as an instruction immediate. Rbr', Rbb' and A' are stored back
to SDRAM and compared with a model.

## The correlation-matrix example

`tb/tb_matmul_lc_workload.sv` computes the two matrices that the interference
canceller needs, from the same channel estimate the matched filter uses:

L[k][j] = Σₙ Re(a1_k[n]* a0_j[n]),  C[k][j] = Σₙ Re(a0_k[n]* a0_j[n] + a1_k[n]* a1_j[n]) for k ≠ j, C[k][k] = 0

Each cluster holds user k's vectors as lane streams. User j's vectors come as
broadcast streams. These are taken from a second copy of the estimate, loaded
user by user. One L launch (2 products per chip, 7 instructions per chip) and
one C launch (4 products per chip, 11 instructions per chip) produce column j
for eight users. The columns collect in the SRF and go back to SDRAM row-major
through a strided store, which is again a transpose. The diagonal of C is then
overwritten by a store of K zeros with stride K + 1. The kernels never need to
know which user they serve. The testbench compares both matrices in SDRAM with
a model and checks the cycle and operation counts.

## The Viterbi example

`tb/tb_viterbi_workload.sv` decodes a rate-1/2 convolutional code with
constraint length 5 (16 states, generators 23 and 35 octal) for 32 users.
Each cluster decodes one user. Each block has 28 data bits and 4 zero tail
bits.

All trellis state stays in the SRF. For every state, the kernel keeps a path
metric and a 32-bit survivor word (register exchange: the word holds the
path's input bits, newest in bit 0). States 0–7 and states 8–15 each form one
stream. Each step appends the new states to the same streams, one step further
on, and the kernel reads them back in the next step. This needs no indexed
access. The state numbering puts the newest input bit in the top bit, so
butterfly j reads old states 2j and 2j+1, which are adjacent in the stream. It
writes new state j to the first stream and j+8 to the second. So both output
streams are written in the order they are read back.

One trellis step is 95 instructions: 2 reads of received values, 4 branch
metrics, and 8 butterflies of 13 instructions that overlap by two. A butterfly
is two add-compare-select operations (ADD, LT, MIN) and two survivor selects.
A survivor select is computed as `sa + dec*(sb − sa)`, which is one of the few
uses of the multipliers here. After 32 steps, the survivor of state 0 is the
decoded block. The testbench inverts two received code bits per user. It then
checks that every user decodes without error, and that all final metrics and
survivors equal those of a model.

## Interfaces of `stream_processor`

| group | signals | notes |
|---|---|---|
| host | `cmd_valid`, `cmd_ready`, `cmd` (`cmd_t`), `idle` | `idle` = queue empty and nothing running |
| microcode | `ucode_we`, `ucode_addr`, `ucode_wdata` (`instr_t`) | write only while no kernel runs |
| SDRAM ×4 | `mem_req`, `mem_we`, `mem_addr`, `mem_wdata` → ; ← `mem_ack`, `mem_rdata` | request held until ack |
| network | `net_out_valid/ready/data`, `net_in_valid/ready/data` | valid/ready, 32-bit words |
| status | `cmds_done`, `stall_cycles`, `kernel_cycles`, `queue_full_cycles`, `mem_wait_cycles`, `net_backpressure_cycles`, `perf_cycles`, `perf_add_ops`, `perf_mul_ops` | free-running since reset |

Reset is asynchronous and active low. Registers, queues and counters are
cleared. The SRF and microcode contents are not.

The utilisation of one unit type is `perf_add_ops / (3 * perf_cycles)`, and the
same for multipliers. The counts are for one cluster; all clusters execute the
same instructions.

## Parameters (`rtl/sbp_pkg.sv`)

| name | value | origin |
|---|---|---|
| `NUM_CLUSTERS` | 8 | source design |
| `NUM_ADD`, `NUM_MUL` | 3, 3 | source design (3 + 3 configuration) |
| `MEM_CHANNELS` | 4 | source design (four SDRAMs) |
| `DATA_W`, `FRAC_BITS` | 32, 15 | own choice |
| `NUM_REGS` | 16 | own choice |
| `UCODE_DEPTH` | 256 | own choice |
| `NUM_IN`, `NUM_OUT` | 8, 2 | own choice |
| `SRF_ROWS` | 4096 (128 KB in total) | own choice, the size of the SRF of the Imagine processor this design derives from |
| `stream_controller.QDEPTH` | 4 | own choice |

## What is taken from the source design and what is not

Taken from it:

* the block structure: host, stream controller, SRF at the centre, streaming
  memory system with four SDRAMs, network interface, microcontroller, and eight
  SIMD VLIW clusters;
* three adders and three multipliers per cluster, with no divider;
* the use of memory-side data rearrangement (odd/even split, transpose) between
  kernels, with the clusters idle while it happens;
* the workload: the kernel chain of the receiver and its sizes (32 users,
  spreading length 32).

This design's own choices: everything below the block level. That covers the
instruction format and its timing, the register file, fixed point, stream
addressing, the SRF banking and port count, the command set and queue, the
memory handshake and address patterns, and the network handshake.

Simplifications to be aware of:

* One command at a time. Memory transfers, kernels and network transfers never
  overlap.
* One access in flight per memory channel and one word per cycle from the
  address generator. Bank conflicts are not reordered around.
* One stream read per instruction. This port is what limits unit utilisation.
  A cluster with several stream ports, as the block diagram of the source
  design suggests, would need a second input slot and a second SRF read port.
* No inter-cluster communication network. Shared data reaches the clusters by
  broadcast reads.
* The correlation update, matrix product, iteration update, L/C, matched
  filter, PIC and Viterbi (constraint length 5) kernels are written and
  verified. None is software-pipelined: each waits out the two-cycle
  stream-input latency, so the units are far from fully used. The constraint
  length 9 decoder is not programmed (see the notes below).
* No path-metric normalisation in the Viterbi kernel. 32-bit metrics are
  large enough for the block lengths used.

Capacity notes for the other kernels at K = N = 32 (32-bit words, SRF =
32768 words):

| kernel | working set |
|---|---|
| correlation update and A update | about 29K words with all copies (simulated) |
| L and C matrices | about 10K words with the broadcast copy (simulated) |
| PIC | about 3.2K words (simulated) |
| Viterbi, rate 1/3, constraint length 9 | 4096 words per step for each group of eight users (256 states, metric and survivor): two steps fit, so it would take one launch per step instead of one per block |

## Simulating

All files are SystemVerilog 2017. `sbp_pkg.sv` comes first. Each testbench
prints `TB_RESULT checks=N failures=M`. Example with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/sbp_pkg.sv tb/tb_stream_processor.sv --top-module tb_stream_processor -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_adder_unit`, `tb_multiplier_unit` | every operation against integer reference arithmetic |
| `tb_alu_cluster` | random full VLIW instructions against a register model; stream-input delay |
| `tb_microcontroller` | nested loops: instruction trace, stream addresses, done timing, counters |
| `tb_stream_register_file` | random lane/element reads and writes against a flat model |
| `tb_streaming_memory_system` | block copy over four channels and on one channel (exact timing), odd/even gather, transpose, strided store, random wait states, simultaneous deliveries |
| `tb_network_interface` | send with stalling receiver (3 cycles/word when ready), receive with gaps |
| `tb_stream_controller` | random command burst: order, operands, SRF owner, queue backpressure, counters |
| `tb_stream_processor` | matched filter end to end at full size (above) |
| `tb_channel_estimation_workload` | correlation update, matrix product and iteration update at full size (above) |
| `tb_matmul_lc_workload` | L and C matrices at full size, with a transposing store and a diagonal-zeroing store (above) |
| `tb_viterbi_workload` | Viterbi decoding of 32 users with injected errors, all trellis state kept in the SRF (above) |
| `tb_pic_workload` | three PIC stages at full size, with the transpose done by a strided load (above) |

`tb/sdram_model.sv` is a behavioural SDRAM for simulation only. It has random
wait states and `peek`/`poke` functions for testbench access.

To write a new kernel, build `instr_t` words as `tb_stream_processor.sv` does
(see `build_mf`), load them through the microcode port, and launch them with
`CMD_KERNEL`. Follow the two-cycle stream-input rule.
