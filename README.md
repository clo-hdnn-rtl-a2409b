# Clo-HDnn: a continual-learning accelerator with hyperdimensional classification

Clo-HDnn learns new classes on the device, one sample at a time, with no
gradient computation. A sample first becomes a feature vector. The feature
vector is encoded into a long binary *query hypervector* (QHV) of up to 8192
bits. Learning adds the QHV into the *class hypervector* (CHV) of its label.
Inference finds the CHV nearest to the QHV.

Two ideas keep this cheap:

* **Two modes.** Hard inputs such as natural images go through a CNN feature
  extractor first. That is *normal mode*. Easy inputs, such as clean 1-D
  signals or features the host has already computed, skip the extractor.
  That is *bypass mode*, and it saves most of the time and energy.
* **Progressive search.** The QHV is produced 64 bits at a time. After each
  64-bit segment the partial distance to every class is updated. Once the
  best class leads the runner-up by more than a threshold `Th`, the search
  stops and the rest of the hypervector is never encoded. An encoder built
  on a Kronecker-factored projection makes per-segment encoding cheap.

The feature extractor uses *weight clustering*. Every weight of an output
channel is replaced by one of K shared centroid values. The inputs that share
a centroid are added together first. Then each sum is multiplied once by its
centroid.

This repository holds synthesizable SystemVerilog for the whole digital
accelerator, together with a self-checking testbench for every block.

## Structure

```
host link (IO clock)                core clock
 37-bit words in ──► cdc_fifo ──► clo_ctrl ──► wcfe (4 x 16 PEs, BF16)
                                     │              │ FE_LOAD (BF16 → INT8)
                                     │              ▼
                                     └────────► hd_module
                                                 ├ input buffer (1024 INT8 features)
                                                 ├ kron_encoder ──► SIPO ─┐
                                                 │      (or a raw QHV row) ┤
                                                 ├ hd_search ◄─────────────┤
                                                 ├ hd_train  ◄─────────────┘
                                                 └ chv_cache
 34-bit words out ◄── cdc_fifo ◄── sync_fifo ◄── clo_ctrl (results, read data)
```

| file | role |
|---|---|
| `clo_hdnn.sv` | top level: host link, FIFOs, controller, the two engines |
| `clo_pkg.sv` | opcodes, instruction structs, buffer numbers, link tags |
| `clo_ctrl.sv` | instruction decoder and sequencer |
| `wcfe.sv`, `wcfe_pe.sv` | weight-clustering feature extractor and its PE |
| `bf16_add.sv`, `bf16_mul.sv`, `bf16_to_int8.sv` | BF16 arithmetic and the conversion to INT8 features |
| `hd_module.sv` | HD classifier: buffers, sequencing of encode/search/train |
| `kron_encoder.sv`, `adder_tree8.sv` | Kronecker encoder and its 8-input bipolar adder trees |
| `hd_search.sv` | per-segment distance accumulation and the margin test |
| `hd_train.sv` | saturating INT8 bundling of a QHV into a CHV |
| `chv_cache.sv` | CHV storage, one 64-element segment per word |
| `sync_fifo.sv`, `cdc_fifo.sv` | single-clock and dual-clock FIFOs |

The top's defaults are the chip's limits: 128 classes, D up to 8192 (128
segments), up to 1024 features, and a 4 x 16 PE array.

## The Kronecker encoder (the hardest part)

A plain random-projection encoder multiplies the F features by an F x D
matrix of ±1. For F = 1024 and D = 8192 that is 8 Mbit of weights and 8 M
additions per sample. Here the projection matrix is the Kronecker product
of two small ±1 matrices instead:

* The features are viewed as a matrix `x[p][q]`, with `p < f1` and `q < f2`,
  so F = f1·f2. The shape is chosen per task: `f1` is a multiple of 8 up to
  64, and `f2` is a multiple of 8 up to 128. A feature count that does not
  factor this way is padded with zeros, which add nothing to the sums.
* `B` is f2 x 64 and `A` is f1 x NSEG, where NSEG = D/64.
* Stage 1 runs once per sample: `Z[p][k] = Σq x[p][q]·B[q][k]` for the 64
  columns k.
* Stage 2 runs once per segment s: `H[s][k] = Σp A[p][s]·Z[p][k]`.
* QHV bit `64·s + k` = `H[s][k] >= 0`.

This stores f1·NSEG + 64·f2 weight bits instead of F·D. The work is
f1·f2·64 + f1·64 additions for the first segment and f1·64 for each further
segment. The total cost has the form f2·d1·(f1 + d2). Because every segment
needs only one column of A, segments can be made one at a time on demand,
and progressive search depends on exactly that.

The hardware has:

* 32 adder trees, each adding 8 operands with ±1 weights.
* A weight buffer of eight 256-bit register-file banks. One row gives each
  tree one weight byte.
* A PISO store that holds Z between the two stages.
* A SIPO that collects the 64 sign bits of a segment.

Stage 1 broadcasts the same 8 features to all 32 trees. Each tree gets its
own weight byte, so the trees work on 32 different columns k. A row of Z
(64 columns) therefore takes two passes. Stage 2 gives each tree its own 8
values of Z and one shared byte of A.

Cycle counts:

* Stage 1: `f1·2·(f2/8) + 2` cycles.
* Each segment: `2·(f1/8) + 2` cycles.

Weight buffer rows are 256 bits wide. The host writes them 32 bits at a time
at word address `row·8 + part`. Row layout:

* Rows `2c + h` (c < f2/8, h < 2) hold B. Bit j of byte t is
  `B[8c+j][32h+t]`.
* Rows `32 + 4c + s/32` (c < f1/8) hold A. Bit j of byte `s%32` is
  `A[8c+j][s]`.
* A 1 bit means +1 and a 0 bit means −1.

## Progressive search and training

`hd_search` reads one CHV segment per cycle, one class after another. It
adds that class's partial distance, `Σk −q_k·c_k`, where q is ±1 from the
QHV bit. It keeps the best and second-best totals. After the last class it
reports:

* the best class;
* the margin, which is second-best minus best;
* `terminate`, which is set when margin > Th.

A segment search takes `n_cls + 2` cycles.

CHV elements are INT8. For an inference precision of `prec` bits (1 to 8)
each element is first reduced: it is divided by 2^(8−prec) with rounding
down, and at 1 bit only its sign (±1) is used. Smaller Th values stop the
search earlier and cost some accuracy. The chip's evaluation used Th = 64
and Th = 32.

`hd_module` runs inference as: stage 1, then for each segment encode →
search → test. It stops at the first segment whose margin is over Th if
progressive search is on. Otherwise it stops after NSEG segments. It reports
the class, the margin, the number of segments used and an early-exit flag.

Training encodes every segment. `hd_train` adds the segment into the
label's CHV as +1 for a 1 bit and −1 for a 0 bit, saturating at −128 and +127.

A "raw" flag makes the search take its segments straight from the input
buffer, with row s as segment s. The host can then classify hypervectors
that were encoded elsewhere.

## Weight-clustering feature extractor

The PE array is 4 rows x 16 columns:

* A row works on one activation vector of N inputs (for a convolution,
  a flattened input patch).
* A column is one output channel. It has one 4-bit centroid index per input
  position and K = 16 BF16 centroid weights.

Each PE runs in two phases:

1. **Merge**, N cycles. It adds each incoming activation into bucket
   `idx[i]`.
2. **Multiply**, K cycles. It accumulates `bucket[k]·w[k]`.

A layer pass takes N + K + 3 cycles and writes 64 BF16 results to the output
feature buffer. All arithmetic is BF16 with round-to-nearest-even.
Subnormals are flushed to zero.

`FE_LOAD` turns the 64 results into INT8 features for the HD side. It
multiplies by a programmable power of two, truncates toward zero, and
saturates. It writes them into one 64-feature block of the HD input buffer.
A longer feature vector is built from several passes.

## Host interface and instruction set

Link words, all in the IO clock domain with valid/ready handshakes:

* **In:** 37 bits, `{tag[4:0], payload[31:0]}`. Tag 1 means the payload
  holds an instruction in bits 19:0. Tag 0 means a data word.
* **Out:** 34 bits, `{tag[1:0], payload[31:0]}`. Tag 1 is read data. Tag 2
  is an inference result.

Instructions are 20 bits wide.

**Memory instructions** have the fields `opcode[19:16] src[15] dst[14]
burst[13:12] addr[11:0]`:

* `STORE_BUF` writes the 2^burst data words that follow it.
* `READ_BUF` returns 2^burst words.
* The buffer is `addr[11:9]` and the first word is `8·addr[8:0]`.
* `dst` (for stores) or `src` (for reads) selects the side: 1 = HD module,
  0 = WCFE.

| side | buf | contents | word w |
|---|---|---|---|
| WCFE | 0 | activations | row `w/512`, inputs `2(w%512)`, `+1` |
| WCFE | 1 | centroid indices | input `w/2`, columns `8(w%2)..+7` (4 bits each) |
| WCFE | 2 | centroid weights | centroid `w/8`, columns `2(w%8)`, `+1` |
| WCFE | 3 | output features (read) | row `w/8`, columns `2(w%8)`, `+1` |
| HD | 0 | input buffer | features `4w..4w+3` (INT8) |
| HD | 1 | encoder weights | see the encoder section |
| HD | 2 | CHVs | class `class_sel`, segment `{page, w[8:4]}`, part `w[3:0]` |
| HD | 3 | class/page select | data[6:0] class, data[9:8] segment page |

**Arithmetic instructions** have the fields `opcode[19:16] operand[15:0]`:

| instruction | operand |
|---|---|
| `FE_CONFIG` | [10:0] inputs per PE row |
| `FE_INFER` | runs one extractor pass and waits for it |
| `FE_LOAD` | [4:0] signed scale exponent, [8:5] destination 64-feature block |
| `HD_ENC_PRELOAD` | [3:0] f1/8, [8:4] f2/8, [15:9] segments − 1 |
| `HD_ENC_SEG` | [13:0] Th, [14] raw-hypervector input, [15] progressive search on |
| `HD_TRAIN` | [6:0] label; with [15] set, clear all CHVs instead |
| `HD_INFER` | [3:0] precision (1..8), [11:4] number of classes |

`HD_INFER` returns one result word with these fields:

* `[6:0]` class
* `[14:7]` segments used
* `[15]` early exit
* `[31:16]` margin, saturated to 16 bits

Instructions run in order. Each one finishes before the next is taken.

Typical sequences:

* **Bypass:** store the encoder weights, `HD_TRAIN` with bit 15 set (clear),
  then `HD_ENC_PRELOAD`. Per sample: `STORE_BUF` the features, then
  `HD_TRAIN label` or `HD_ENC_SEG` + `HD_INFER`.
* **Normal:** store the extractor's activations, indices and centroids,
  then `FE_CONFIG`, `FE_INFER`, `FE_LOAD`, and continue as in bypass.

## What is the chip's and what is this design's

These parts follow the original chip's description:

* the block structure;
* the two modes;
* the merge-then-multiply extractor with a 4 x 16 array;
* the Kronecker encoder with an 8-bank weight buffer, 32 eight-input adder
  trees, a PISO and a SIPO;
* segment-wise search with the "margin > Th" stop;
* INT8 class vectors and 1- to 8-bit inference precision;
* BF16 in the extractor;
* the nine instruction names and the 4/2/2/12 and 4/16 field widths;
* the 37- and 34-bit link widths.

These are choices of this design:

* opcode values and operand fields;
* link tags;
* buffer maps;
* the centroid count K = 16;
* the distance formula and how precision reduction works;
* the saturating update rule;
* FIFO depths and all cycle timing.

Departures and limits:

* **CHV storage.** `chv_cache` keeps every class at full length on chip:
  128 classes × 8192 × INT8 = 1 MB at the defaults. The chip has a 32 kB HD
  memory and keeps only part of the class vectors there. Its refill scheme
  is not modelled.
* **Extractor scope.** Only one clustered matrix-vector layer pass is built.
  The memories are registers sized for 1024 inputs per row, about 16.5 kB,
  against 168 kB on the chip. No network schedule (layers, pooling,
  activation functions) is provided. The host sequences passes.
* **FIFOs.** The chip has several unit-specific synchronous input FIFOs.
  Here a single dual-clock input FIFO feeds the controller.
* **Not included:** the clock generator and the JTAG port. `core_clk` and
  `io_clk` are inputs. Reset (`rst_n`, active low, synchronous) must be held
  for a few cycles of both clocks.

## Simulation

Every testbench compares against its own model, built independently of the
RTL. It also checks cycle counts where they are fixed. It prints
`TB_RESULT checks=N failures=M` and ends with a watchdog. To build and run
one with Verilator 5 from the repository root:

```
verilator --binary --timing -Irtl -Itb rtl/clo_pkg.sv tb/bf16_ref_pkg.sv \
    $(ls rtl/*.sv | grep -v clo_pkg) tb/tb_clo_hdnn.sv --top-module tb_clo_hdnn
./obj_dir/Vtb_clo_hdnn
```

Replace `tb_clo_hdnn` with any other testbench name. `tb/bf16_ref_pkg.sv`
is a real-number BF16 model that the extractor testbenches use.

| testbench | what it covers |
|---|---|
| `tb_bf16_add` | 40 000 random additions against a real-number model |
| `tb_wcfe_pe`, `tb_wcfe` | merge/multiply results, host buffer maps, N+K+3 latency |
| `tb_kron_encoder` | every QHV bit against a direct projection with the full Kronecker matrix; both stage latencies |
| `tb_hd_search` | distances, best class, margin, termination at precisions 1, 4 and 8 bits; n_cls+2 latency |
| `tb_hd_train` | saturating updates, including saturation |
| `tb_chv_cache` | masked writes and reads |
| `tb_hd_module` | training, progressive and full inference, raw-QHV mode, CHV read-back and segment pages |
| `tb_sync_fifo`, `tb_cdc_fifo` | data order and the full/empty flags under random push/pop; the dual-clock one with unrelated clocks |
| `tb_clo_ctrl` | every instruction's fields, bursts, FE_LOAD conversion, result word |
| `tb_clo_hdnn` | end to end at the default parameters (see below) |
| `tb_workloads` | two bypass-mode workload shapes at D = 2048 through the top: 26 classes with 617 features, 6 classes with 561 features; full search against Th = 64 and Th = 32 |

`tb_clo_hdnn` drives the top with its defaults through the host link. The
core clock runs at 100 MHz and the IO clock at about 71 MHz. The host
stalls the output at random. The test:

1. Loads encoder weights and clears the class vectors.
2. Trains four classes in bypass mode (16 x 16 features, 512 dimensions).
3. Classifies new samples with progressive search on and off, and at 1-bit
   and 8-bit precision.
4. Runs one extractor pass, reads the outputs back, and checks them against
   BF16 arithmetic.
5. Loads the outputs as features and classifies them in normal mode (8 x 8
   features).

Every result word is predicted by the testbench's own model. The test fails
if any of these never happens: training, clear, bypass inference,
normal-mode inference, early exit, full-length search, 1-bit search,
read-back, input back-pressure, output stall.

`tb_workloads` feeds the top synthetic samples shaped like two speech and
activity-recognition sets. The features are zero-padded to 8 x 80 and
8 x 72 matrices. Each test sample is classified three times with 1-bit class
vectors: full search, Th = 64 and Th = 32. The test prints the accuracy and
the number of segments searched for each. The data is synthetic and easy,
so the early stops come sooner than they would with real data.

Neither test reproduces the chip's accuracy figures or search-reduction
percentages. Those depend on real datasets and trained models.
