# Sparse-to-dense COO DMA for a systolic-array accelerator

Graph convolutional networks (GCNs) multiply a renormalised adjacency matrix by
dense feature and weight matrices. The adjacency matrix is very sparse, and so are
the input features, often under 1 % dense. A systolic-array GEMM accelerator of the
Gemmini kind loads its operands with a dense DMA. That DMA moves every zero, and
for GCN inference it ends up spending most of its time loading zeros.

This RTL is a **sparse DMA** for such an accelerator. Software keeps a sparse
matrix in main memory in COO form: a value array plus an array of (row, column)
index pairs. One instruction then expands a rectangular tile of that matrix into
the accelerator's local memory in dense form, zeros included. The accelerator's
scratchpad and accumulator are included, with FP32 accumulation. The accelerator
can then run its ordinary dense GEMM on the tile. Only the nonzeros and their
indices cross the memory bus.

Default configuration: a 16 × 16 FP32 array, so each local-memory row holds 16
FP32 elements; a 128 KB scratchpad (2048 rows); a 32 KB accumulator (512 rows);
32-bit indices.

## Block structure

```
            cmd (funct, rs1, rs2)
                  |
          sdma_cmd_decoder      keeps dataAddr/indexAddr, decodes a sparse mvin into a job
                  | job (valid/ready)
            coo_expander        walks the tile, one element write per cycle
             |        ^ entries (row, col, value), in order
             |    coo_reader    tagged word reads ahead, reorder buffer
             |        ^ v  mem_req / mem_resp (out of order)
             v
   scratchpad  |  accumulator (+ fp32_add)
```

| file | what it is |
|---|---|
| `rtl/sdma_pkg.sv` | widths, funct codes, the `job_t` and `coo_entry_t` structs, the operand decoder function |
| `rtl/sdma_cmd_decoder.sv` | instruction front end and the one-entry job register |
| `rtl/coo_reader.sv` | prefetching COO entry reader with a reorder buffer |
| `rtl/coo_expander.sv` | the expansion loop and local address generation |
| `rtl/scratchpad.sv` | element-write, row-read memory, 2048 × 16 × 32 bit |
| `rtl/accumulator.sv` | the same at 512 rows, with overwrite or FP32 add per write |
| `rtl/fp32_add.sv` | combinational IEEE-754 single-precision adder |
| `rtl/sdma_top.sv` | the above wired together |

## Programming model

There are two instructions, in the style of RoCC (the RISC-V custom-instruction
interface). Each has a 7-bit `funct` and two 64-bit operands.

**Sparse config** (`funct = 20`): `rs1` = byte address of the value array,
`rs2` = byte address of the index array. Both addresses stay in registers until
the next config.

**Sparse mvin** (`funct = 21`):

| operand bits | field |
|---|---|
| `rs1[15:0]`  | first column of the tile (`colStart`) |
| `rs1[31:16]` | first row of the tile (`rowStart`) |
| `rs2[28:0]`  | local base row address |
| `rs2[30]`    | accumulate (only with the accumulator target) |
| `rs2[31]`    | target: 0 = scratchpad, 1 = accumulator |
| `rs2[47:32]` | number of columns |
| `rs2[63:48]` | number of rows |

A tile has at most 16 rows and any number of columns. Every mvin starts at the
configured array addresses. The hardware does not advance them, so software issues
a config before each mvin, pointing at that tile's part of the arrays.

### What the COO arrays must look like

This is the part most likely to surprise a user:

* The index array interleaves its pairs: the row of entry *k* is at
  `indexAddr + 8k`, its column at `indexAddr + 8k + 4`, and its value at
  `dataAddr + 4k`. PyTorch's native COO index tensor is 2 × n: all rows, then all
  columns. Such a tensor has to be interleaved first.
* Entries are sorted by row, then by column. Both are global coordinates, as in
  the full matrix.
* Starting at the configured addresses, the arrays must hold **exactly the tile's
  nonzeros**. The expander consumes an entry only when it matches the current
  coordinate exactly. An entry that lies outside the tile, or out of order, is
  never consumed, and every later position of the tile then reads as zero. The
  usual arrangement is a separate, per-tile COO segment that software prepares.
* The DMA is not told how many entries there are. The reader fetches ahead past
  the last one, so the words after a tile's segment must be readable. Their
  contents do not matter.

## Expansion and local layout

The expander visits the tile row by row, `r = 0 .. rows-1`, and column by column,
`c = 0 .. cols-1`. At each position it compares `(rowStart + r, colStart + c)`
with the next entry. On a match it writes the entry's value and takes the next
entry. Otherwise it writes 0. So every position of the tile is written exactly
once.

Element `(r, c)` goes to

```
local row  = base + r + (c / DIM) * DIM
element    = c % DIM
```

This is the same block layout as a dense move-in. Columns 0..15 fill rows
`base .. base+rows-1`, columns 16..31 fill `base+16 ..`, and so on. A 16 × 1000
strip therefore takes 16 × 63 = 1008 rows. If a tile has more than DIM rows, one
column block overlaps the next, as with the dense move-in; the hardware does not
check for this.

With the accumulator as the target, `accumulate = 0` overwrites each element and
`accumulate = 1` adds to it in FP32. The whole tile is written either way, so an
accumulate mvin adds zeros wherever the tile has no nonzero.

## The prefetching reader

Each COO entry takes three 32-bit reads: its row, its column and its value. If
those reads were issued one at a time, memory latency would set the speed.
`coo_reader` issues them back to back, for up to `PREFETCH` (4) entries ahead.
Each read carries a tag `{slot, word}`, and the memory may answer in any order. A
response goes into its slot of a small buffer. The oldest slot is handed to the
expander once its three words are all there, so entries always come out in array
order. When the tile is done, the expander stops the reader, which discards what
it has prefetched. The next job starts only when every read still in flight has
returned, so a late response can never land in a new job's buffer. At most
`3 × PREFETCH` reads are in flight.

The memory port is deliberately simple: one 32-bit word per request, tagged
responses always accepted (no backpressure on responses). To attach it to a wider
bus, for example 8 or 16 bytes per cycle, put an adapter in front that splits
requests and returns tagged words.

## Timing

* Once the first entry has arrived, the expander writes one element per cycle,
  provided the reader keeps ahead. Measured with a memory that accepts one request
  per cycle and answers in 1–8 cycles: 16 × 1000, 16 × 2048 and 16 × 1655 strips at
  graph-like densities run at 0.999–1.000 elements per cycle.
* A dense stretch of nonzeros is limited by the memory port: each nonzero costs
  three requests, so with one request per cycle a fully dense region runs at one
  element per three cycles.
* `stall` is high in a cycle where the expander waits for an entry. `done` pulses
  when a tile has finished and the reader has drained. `busy` covers a waiting job
  and a running job.
* The decoder holds one waiting mvin, and a third mvin is refused (`cmd_ready`
  low) until the first one has finished. A config instruction is accepted in any
  cycle. It does not change a job that is already waiting.
* Scratchpad and accumulator row reads have one cycle of latency. The accumulator's
  add is a read-modify-write that finishes within the write cycle.

## FP32 accumulation

`fp32_add` rounds to nearest, ties to even. It reads subnormal inputs as zero and
flushes results below the normal range to zero. It returns infinity on overflow,
and the quiet NaN `0x7fc00000` for NaN inputs and for ∞ − ∞. Exact cancellation
gives +0. This is a simplification of full IEEE behaviour; change `fp32_add` if
you need gradual underflow.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `DIM` | 16 | array dimension = elements per local row (power of two) |
| `SP_ROWS` | 2048 | scratchpad rows (128 KB at 16 × 4 B) |
| `ACC_ROWS` | 512 | accumulator rows (32 KB) |
| `PREFETCH` | 4 | COO entries read ahead; tag width is `log2(PREFETCH) + 2` |

For a 32 × 32 array set `DIM = 32`. To keep the same capacities, also set
`SP_ROWS = 1024` and `ACC_ROWS = 256`. This configuration is simulated in
`tb_citeseer_strips`.

## Sources of the design and own choices

These parts come from the design description:

* the two instructions and the bit positions of every field;
* the expansion loop and the exact-match rule;
* the block address formula and the interleaved walk of the index array;
* the sizes: a 16 × 16 FP32 array, a 128 KB scratchpad, a 32 KB accumulator,
  32-bit indices;
* the suggestion to batch requests and buffer out-of-order responses;
* overwrite and accumulate into the accumulator.

These are this implementation's own choices:

* the funct codes 20 and 21, and which operand carries which word;
* local offsets taken relative to the tile start, so the tile begins at `base`.
  The printed address formula adds the global row and column. The two agree for
  tiles that start at (0, 0);
* the valid/ready handshakes and the active-low asynchronous reset;
* the tagged one-word memory port, the prefetch depth and the reorder buffer;
* eager reads of values, where the reference algorithm reads a value only on a
  match. The result is the same; only a few reads past the tile are extra;
* the one-entry job register and the read-back ports;
* the subnormal and NaN handling of the adder, and dropping writes beyond the last
  row.

Not built:

* out-of-order scratchpad writes (a write issued as soon as two consecutive
  entries are known), an optimisation that is mentioned but not specified;
* sparse-dense multiplication (SpMM) in the array;
* the systolic array itself, the dense DMA, the transposer, ReLU and scaling units,
  and the host and its caches.

## Simulation

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and
has a watchdog. Build and run, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_sdma_top rtl/sdma_pkg.sv tb/tb_fp32_ref.sv tb/tb_sdma_top.sv
./obj_dir/Vtb_sdma_top
```

| testbench | covers |
|---|---|
| `tb_sdma_top` | whole design at default sizes. It loads two 16 × 32 scratchpad tiles and a tile without nonzeros back to back, does an accumulator overwrite and then an FP32 accumulate, and runs an empty tile. It reads everything back, and counts stalls, refused instructions, out-of-order responses, second column blocks and accumulate writes |
| `tb_citeseer_strips` | operands shaped like a 1000-node citation graph with 3703 features. It runs two DMAs side by side, one at the default 16 × 16 configuration and one at a 32 × 32 configuration with the same memory capacities. Each loads a DIM × 1000 adjacency strip and a DIM × 3703 feature strip, the latter in as many mvins as the scratchpad needs. It checks every element and the element rate. The matrices are synthetic. The per-configuration sequence lives in `tb_strip_runner` |
| `tb_sdma_cmd_decoder` | field extraction, job hand-off under backpressure, config while a job waits |
| `tb_coo_reader` | entry order and contents with out-of-order memory, stop and drain, prefetch window |
| `tb_coo_expander` | every element write of random tiles (offsets, several column blocks, empty tiles, gaps in the entry stream), one element per cycle |
| `tb_scratchpad`, `tb_accumulator` | memories at small sizes; the accumulator test also covers the FP32 adder against a reference model in `tb_fp32_ref` |

`tb_mem_model` is a behavioural main memory. It answers tagged reads after random
latencies and out of order. `tb_fp32_ref` computes reference FP32 sums through
double precision. The simulator has two states, so the testbenches reset or
initialise everything they read.
