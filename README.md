# ExPress: a sparse-matrix expansion engine

Small processors that run neural-network layers want to keep weight matrices
compressed (CSR, bitmap or run-length), because memory is scarce. But software
that walks compressed metadata spends most of its instructions on index
arithmetic and bit tests, not on multiplications. This is especially true at
the moderate sparsities (20–70 % zeros) of typical network layers.

This engine sits next to the CPU's load/store path and removes that overhead.
Software describes where a compressed matrix lives, sets a start bit, and then
simply loads from one fixed address. Each load returns the next value of the
matrix **as if it were stored dense**, in row-major order, zeros included.
Alongside each value comes a **mask bit**: 1 for a stored non-zero, 0 for a
zero the engine inserted. A CPU with a maskable vector unit can use the mask
to skip multiplications by zero. The inner loop of a sparse matrix-vector
product then looks like the dense one:

```c
volatile int *BUF = (int *)0xC0001000;
for (i = 0; i < rows; i++) { s = 0; for (j = 0; j < cols; j++) s += v[j] * *BUF; y[i] = s; }
```

The RTL implements the architecture described in *"ExPress: Simultaneously
Achieving Storage, Execution and Energy Efficiencies in Moderately Sparse
Matrix Computations"* (Adavally et al.). That description covers the block
structure, the register set, the three formats, the buffer and mask scheme,
and the stages of the two pipelines. Bit widths, encodings, handshakes and
timing are not specified there. They are this implementation's choices and
are marked as such below.

## Programming model

All registers are 32 bits wide and are reached through ordinary loads and
stores.

| Address       | Register    | Meaning |
|---------------|-------------|---------|
| `0xC000_0000` | `n_rows`    | rows of the matrix (16 bits used) |
| `0xC000_0004` | `n_cols`    | columns of the matrix (16 bits used) |
| `0xC000_0008` | `format`    | 0 = CSR, 1 = Bitmap, 2 = Run-Length |
| `0xC000_000C` | `rows_base` | byte address of the per-row array |
| `0xC000_0010` | `cols_base` | byte address of the per-non-zero (or bitmap) array |
| `0xC000_0014` | `vals_base` | byte address of the non-zero values |
| `0xC000_0018` | `ele_sz`    | element sizes in bytes: `[7:0]` values, `[15:8]` cols, `[23:16]` rows (1, 2 or 4; 0 means 4) |
| `0xC000_001C` | `start`     | bit 0: write 1 to start or resume, 0 to pause |
| `0xC000_0020` | status      | read only, see below |
| `0xC000_1000`–`0xC000_1FFF` | buffer | load here to receive the dense stream |

The buffer address (`0xC000_1000`) and the window `0xC000_0000–0xC000_2000`
come from the published design. The placement of the individual registers
and of the status word is this implementation's.

**Starting and pausing.** Writing `start = 1` while the engine is idle or
finished starts a new matrix: all internal pointers and the buffers are
cleared. Writing `start = 0` while the engine is running pauses it with all
state kept. Writing `start = 1` again resumes it. Pausing keeps the engine's
place, but its internal pointers cannot be read out or written back, so
another program cannot use the engine in between (see "Not included").

**Loading.** A load with `cpu_vec = 0` returns one element in lane 0. A load
with `cpu_vec = 1` returns `VEC` (8) elements. If the requested data is not
ready yet, the load is stalled: `cpu_gnt` stays low. A vector load waits
until a whole buffer (8 elements) is ready. The one exception is the end of
the matrix: there it returns what is left, and the missing lanes are 0 with
mask 0. The dense stream runs on from one row into the next. Rows are not
padded to a multiple of 8.

**Status word** (`0xC000_0020`), MSB first: `rd_buf[31:24]`, `wr_buf[23:16]`,
`rd_slot[15:10]`, `wr_slot[9:4]`, `empty[3]`, `full[2]`, `fill_done[1]`,
`busy[0]`. These are the active read/write buffer and slot, and the
empty/full flags of the control-unit state register.

## The three formats, as the hardware reads them

This is the part where a mismatch between software and hardware causes the
most trouble. Take the 3×3 example matrix

```
1 2 0
0 3 0
0 4 5
```

| Format | `rows[]` | `cols[]` | `vals[]` |
|--------|----------|----------|----------|
| CSR    | `0 2 3 5` (n_rows+1 offsets into `cols[]`) | `0 1 1 1 2` (column of each non-zero) | `1 2 3 4 5` |
| Bitmap | `0 3 6` (bit offset where each row starts) | bits `1 1 0 0 1 0 0 1 1` | `1 2 3 4 5` |
| Run-Length | `1 1 1` (runs per row) | `2 0  1 1  2 1` (pairs: *count*, *start column*) | `1 2 3 4 5` |

- **Bitmap bit order.** The bitmap is read as 32-bit words. Matrix position
  *k* of the row-major bit stream is bit *k mod 32* of word *k/32*
  (least-significant bit first). Bitmap words are always 32 bits;
  `ele_sz[15:8]` does not apply to them. Because each row's start is read
  from `rows[]`, rows may be padded in the bitmap.
- **Run-Length pairs** are stored as (number of non-zeros, start column), in
  that order.
- **Values** are read in order: the *i*-th non-zero is at
  `vals_base + i * size`. They are sign-extended to 32 bits. Metadata is
  zero-extended.
- All elements are little-endian and must be naturally aligned (a 2-byte
  element at an even address, a 4-byte element at a multiple of 4).

## Inside the engine

```
            CPU load/store port                           memory read port
                  |  ^ data + mask                               ^  |
                  v  |                                           |  v
  express_cpu_port --> express_buf  <--  express_fe_pipe  <--  express_nz_reg  <--  express_be
        |                (NBUF x VEC       (Read Idx, Calc Gap,   (Idx/Value            (metadata walk,
        v                 slots + mask)     Read Value, Fill)      register)             value fetch,
  express_mmr --cfg--> express_ctrl (start / pause / resume / done) --run/init--> all    column calc)
```

The engine is split in two. The **back-end** knows the sparse format. It
fetches metadata and values and produces, for every stored non-zero, a token
`(row, col, value)`. The **front-end** does not know the format. It turns
that token stream into the dense stream. Supporting a new format would
therefore only touch the back-end.

### Back-end (`express_be`, `express_bitscan`)

The back-end performs the five steps of its pipeline — compute the metadata
address, read the metadata, read the value (`vals_base + i * ele_sz`),
compute the column of the next non-zero, hand over the token — in parts
that run at the same time and share one memory read port:

- a **metadata walker**, a state machine that computes metadata addresses,
  reads metadata (one read in flight) and computes columns. It pushes
  `(row, col)` into a 4-entry column queue. It keeps the last metadata word
  it read, so an element that lies in the same word costs no further read.
- a **column fetcher**, used in CSR only. Like the values, the cols array is
  read strictly in order. Once `rows[0]` is known, the fetcher reads cols
  word by word, up to the end of the current row, into a 4-entry word
  queue. The walker takes one column per cycle from the head word.
- a **value fetcher**. The values array is read strictly in order, so the
  address of the i-th value does not depend on any metadata. The fetcher
  reads the array word by word, as far as the columns already queued reach,
  with up to four reads in flight, into a 4-entry word queue. One-byte
  values thus cost one read per four non-zeros.
- a **join**, which takes the head column, picks its value out of the head
  word, and releases the word after its last value.

A small arbiter serves the value fetcher first, then the column fetcher,
then the walker. It keeps a request that was not
granted unchanged until it is, and records in a tag queue which part each
read belongs to, so that responses are steered back in order.

The walker's work per format:

- **CSR.** At the start of a row, the next metadata read is `rows[r+1]`, the
  row's end. Inside the row, `cols[ptr]` is the column itself; it comes
  from the column fetcher's head word.
- **Bitmap.** For each row it reads the starting bit offset. It then reads
  bitmap words one after another. In each word, `express_bitscan` (a masked
  priority encoder) finds the lowest 1 inside the row. The column is that
  bit's position minus the row offset. A word with no 1 inside the row is
  skipped and produces no token.
- **Run-Length.** For each row it reads the run count. For each run it reads
  the (count, start) pair. The run's columns are then start, start+1, and so
  on.

**Throughput.** With a one-cycle SRAM, value reads overlap the metadata
walk. The walker finds one non-zero per cycle: in Bitmap form inside a
fetched word, in Run-Length form inside a run, in CSR from the fetched
column words. The cost per row is a few cycles for the row's metadata, and
in Run-Length a few cycles per run. The front-end accepts one element per
cycle, so CSR and Bitmap matrices stream at close to that rate (table
below).

### Idx/Value register (`express_nz_reg`)

A one-entry valid/ready register between the back-end and the front-end. It
passes one token per cycle when both sides are ready. When the front-end
stops taking tokens, it holds the back-end.

### Front-end pipeline (`express_fe_pipe`)

The front-end has four stages:

1. **Read Next Idx** latches the token.
2. **Calc Gap** compares the token's `(row, col)` with the current dense
   position:
   - if they are equal, it emits the value and consumes the token;
   - if the token is further ahead, it emits a zero and keeps the token;
   - once the back-end is finished and no token is left, every remaining
     position is a zero.
3. **Read Value** forms value and mask.
4. **Fill Buffer** writes the value and mask into the buffer.

The pipeline produces one element per cycle whenever a token (or
end-of-matrix) and buffer space are available, including inserted zeros.
The testbench checks this rate.

Comparing full `(row, col)` positions, rather than columns alone, lets the
same comparator produce a row's trailing zeros and entire empty rows, with no
separate end-of-row marker. The token therefore carries the row as well as
the column.

### Buffers (`express_buf`)

`NBUF` buffers of `VEC` 32-bit slots, each slot with a mask bit. They are
managed as one ring, so they behave as a streaming FIFO: a slot the CPU has
read can be refilled at once. `NBUF = 1` (the default) is the single 32-byte
buffer of the evaluated configuration. `NBUF = 2` gives double buffering.
When every slot is full, the front-end stalls, back-pressure reaches the
back-end, and the back-end stops issuing memory reads.

### Control unit (`express_ctrl`) and registers (`express_mmr`)

The control unit has five states: IDLE, INIT (one cycle that clears every
pointer and the buffers), RUN, PAUSE and DONE. DONE is reached when the
front-end has written the last element. Buffer-space throttling is carried
by the valid/ready handshakes, not by separate counters.

## Interfaces and timing

**CPU port.** The CPU drives `cpu_req`, `cpu_we`, `cpu_vec`, `cpu_addr`
(byte address) and `cpu_wdata`, and must hold them until `cpu_gnt`. Load
results appear on `cpu_rdata[VEC]` and `cpu_rmask[VEC]` with `cpu_rvalid` in
the cycle after the grant. Stores are granted at once. A buffer load is
granted only when data is ready. Stores to the buffer are ignored, and so
are accesses outside the decoded registers (loads there return 0).

**Memory port.** The engine drives `mem_req` and `mem_addr` (word-aligned
byte address) and holds them until `mem_gnt`. The word returns on
`mem_rdata` with `mem_rvalid`, at any later cycle. Up to four reads may be
in flight, and the memory must return them in the order they were granted.

**Other outputs.** `busy`, `done`, and `zero_ins` (a zero was inserted this
cycle, useful for performance counting).

Reset is synchronous and active low. There is one clock.

## Parameters

| Parameter | Default | Origin |
|-----------|---------|--------|
| `VEC`  | 8 | vector length of the evaluated core (8 × 32-bit = 32-byte buffer) |
| `NBUF` | 1 | single buffer, as in the evaluated configuration; 2 = double buffering |
| `IDX_W` (package) | 16 | row/column counter width; own choice, enough for 65535 × 65535 |

## Measured behaviour

These figures use a one-cycle SRAM and a CPU that issues back-to-back
vector loads, at the default parameters. Every value and mask bit is
checked.

| Matrix (rows × cols, sparsity) | CSR | Bitmap | Run-Length |
|--------------------------------|-----|--------|------------|
| 1024 × 1000, 49 %, runs ≈ 11 (DenseNet-like) | 1.13 | 1.15 | 1.20 |
| 1280 × 1000, 11 % (MobileNetV2-like) | 1.13 | 1.14 | 1.44 |
| 2048 × 1000, 53 %, runs ≈ 2 (ResNet-like) | 1.13 | 1.13 | 1.66 |
| 4096 × 1000, 12 % (VGG16-like) | 1.13 | 1.14 | 1.48 |

All values are cycles per dense element, with 1-byte values, 2-byte
column indices and 4-byte row entries. CSR and Bitmap run close to one
element per cycle. Most of the remaining gap comes from the single buffer:
a vector load waits until all eight slots are filled, and refilling starts
only once the load has emptied them. The rest is the few cycles spent on
each row's metadata. Built with `NBUF = 2`, the DenseNet-like Bitmap case
takes 1.05 cycles per element instead of 1.15. Run-Length is slower because each
run costs a metadata read of its own, so short runs (ResNet-like) cost
most.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|-----------|----------------|
| `tb_express_bitscan` | priority encoder against a reference loop, random words and windows |
| `tb_express_nz_reg`  | order and uniqueness of tokens under random valid/ready; one token per cycle at full rate |
| `tb_express_ctrl`    | start, init pulse, pause, resume, done, restart |
| `tb_express_mmr`     | register write/read-back, packed sizes, start/stop pulses |
| `tb_express_buf`     | NBUF = 2 ring against a queue model, scalar/vector reads, flags |
| `tb_express_fe_pipe` | dense stream against the matrix with random gaps; one element per cycle |
| `tb_express_cpu_port`| address decode, stall of an unready load, data/mask timing |
| `tb_express_be`      | tokens of all three formats against the matrix, with memory stalls, 1–6 cycle read latency (several reads in flight, never more than four) and pauses |
| `tb_express`         | whole engine, end to end: all formats, 1/2/4-byte elements, empty rows, all-zero bitmap words, pause/resume, CPU stalls, full buffers, back-end throttling, partial last vector, memory stalls; each mechanism is counted and must occur |
| `tb_express_full`    | one complete 1024 × 1000 bitmap matrix at the default parameters |
| `tb_express_nbuf2`   | whole engine built with two buffers: all formats, values and masks, buffer switching on both sides, both buffers full, filling one buffer while the other is read |
| `tb_express_dnn`     | seven full-size DNN fully connected layers × three formats |
| `tb_express_synth`   | synthetic 64…4096 square matrices at 10–70 % sparsity |

The testbenches share `tb/express_tb_pkg.sv`, which generates random
matrices with a set sparsity and mean run length and encodes them
independently of the RTL. They also use `tb/sram_model.sv`, a behavioural
one-cycle SRAM that can insert random stalls and, optionally, a random
read latency with answers kept in order. Running one with Verilator
5:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/express_pkg.sv tb/express_tb_pkg.sv tb/tb_express.sv --top-module tb_express -o sim
./obj_dir/sim
```

Lint a module on its own with
`verilator --lint-only -Wall rtl/express_pkg.sv rtl/<module>.sv`.

## Not included

- The CPU, the SRAM and on-chip interconnect, the flash, and (for the
  high-performance variant) the L1D cache, TLB, L2 and DRAM are outside the
  engine. The ports are where they would connect. The testbenches drive the
  CPU port directly and use a behavioural SRAM.
- Optional extensions that are mentioned but not designed are also left
  out: memory-request reordering or row-buffer-aware prefetching,
  participation in cache coherence, writing compressed output,
  higher-dimensional tensors, and sub-block dimensions for multi-core use.
- Saving and restoring the engine's state across a context switch. The
  published design treats the unread buffers and the metadata pointers as
  process state that the OS saves and restores. Here the configuration
  registers can be read back, but the walker's pointers and the buffer
  contents have no register interface.

## Where this design departs from the published one

- **Back-end queues and word reuse.** The back-end overlaps its stages
  through three 4-entry queues, up to four reads in flight and a kept
  metadata word. That adds about 60 bytes of storage beyond the published
  estimate of under 50 bytes for the back-end. The published text gives the
  stage order but not how the stages overlap, nor that narrow elements
  sharing a word are read once.
- **Run-Length rate.** The walker keeps one metadata read in flight, so
  each run costs a few cycles before its first non-zero. Matrices with
  short runs therefore stay well short of one element per cycle.
- **Value width.** Values are sign-extended from 1 or 2 bytes to 32 bits.
  The published design does not say how narrow values are widened.
- **Run-Length pair order.** Each run is stored as (count, start column).
  One table of the published text lists the pair as (start, count). The
  description of the format, its example and its reference code all use
  (count, start), which is the order followed here.
- **Register and status addresses.** Only the buffer address is published.
  The register offsets and the status word address are this design's.
