# GHRR accelerator: order-sensitive hyperdimensional classification without permutations

Hyperdimensional computing represents symbols as very long vectors and builds
structures by *binding* (association) and *bundling* (superposition). In the
common complex-valued form (FHRR) binding is element-wise multiplication, which
commutes: `a*b` equals `b*a`, so a sequence cannot tell its own order apart
without extra permutation hardware. Generalised Holographic Reduced
Representations (GHRR) replace each complex element with a small `m x m`
unitary matrix and bind by matrix multiplication. Matrix products do not
commute, so order and direction are encoded by the binding itself.

Matrices are expensive to compare, but the similarity of two GHRR hypervectors
is a sum of matrix traces, and `tr(X^H Y)` is the dot product of the two
matrices written out as vectors. Flattening every hypervector into
`D*m*m` complex numbers therefore turns GHRR similarity search into an ordinary
dot product:

    delta(H1, H2) = Re[ flat(H1)^H flat(H2) ] / (m*D)

This RTL implements an accelerator built on that idea, following the GHRR
accelerator architecture of *Scalable Symbolic Reasoning with Matrix-Based
Brain-Inspired Representations and Vector-Space Acceleration*: an encoder that
binds sequences by matrix products, an inference block that compares the
flattened result with a codebook through P parallel normalised dot products
and picks the best match, a dual-channel DMA engine, and a host interface that
coordinates them. The default sizes are that architecture's evaluated
configuration: `D = 8000` dimensions, `m = 2`, `P = 8` candidates in parallel.
Everything below the block level (pipelines, number formats, buffer
organisation, the register map) is this design's own. Those choices are
listed in "Departures and own choices" below.

## What is computed

A query is a sequence of `L` inputs. Input `t` supplies, for every dimension
`j`, `m` phases `theta[t][j][0..m-1]` (8-bit, a full turn is 256). Each
dimension also has a fixed unitary matrix `Q_j`, loaded once. The encoder
forms

    U[t][j] = Q_j * diag(exp(i*theta[t][j][0]), ..., exp(i*theta[t][j][m-1]))
    H[j]    = U[0][j] * U[1][j] * ... * U[L-1][j]          (matrix product, in order)

Every `U` is unitary, so every `H[j]` is unitary. Swapping two inputs
changes `H`.

The inference block holds up to `P*NG` codebook vectors `C_c`, each stored in
the same flattened form. For a query `H` it computes, for every class `c`
below the configured class count,

    score_c = Re<flat(H), flat(C_c)> / (|flat(H)| * |flat(C_c)|)

in Q1.14 (16384 = 1.0). This is the magnitude-invariant cosine similarity. For
unitary hypervectors it equals `delta` above. It returns the class with the
highest score, and that score. On a tie the lower class number wins.

## Data layout: one word per dimension

The unit moved and stored everywhere is a *dimension word*: the `m*m = 4`
complex entries of one matrix, row-major, each entry a 16-bit real part
followed by a 16-bit imaginary part (`cplx_t` in `ghrr_pkg`), 128 bits in all.
Interleaving real and imaginary parts makes the complex dot product a real
one: `Re<a,b> = sum(a.re*b.re + a.im*b.im)`. One external-memory word, one
transform-memory entry, one query-buffer entry and one codebook-buffer entry
are each one dimension word.

External memory holds three regions, at addresses the host programs:

| region     | words                     | order                                               |
|------------|---------------------------|-----------------------------------------------------|
| transforms | `DIM`                     | `Q_j` for j = 0 .. DIM-1                             |
| codebook   | `NUM_CLASSES * DIM`       | class after class, each DIM dimension words          |
| inputs     | `NUM_QUERIES * DIM * L`   | query after query; within a query, for each dimension the L inputs in order; phase k in bits `[8k+7:8k]` |

The inputs are ordered by dimension first. That lets the encoder finish one
dimension completely before it starts the next, so it needs only a one-matrix
accumulator and no buffer of partial products.

## Block structure

```
               host register bus                      external memory port
                      |                                       |
              +---------------+   commands    +---------------------------+
              | ghrr_host_if  |-------------->|  ghrr_dma (2 channels,    |
              | registers,    |<------------->|  round-robin, tag queue)  |
              | coordinator,  |  ch0/ch1      +---------------------------+
              | result queue  |  handshakes     | ch0 data        | ch1 data
              +---------------+                 | (transforms,    | (codebook)
               | write enables, addresses,      |  phases)        |
               | start, search control          v                 v
               +-------------------------> +--------------+  +------------------+
                                           | ghrr_encoder |->| ghrr_inference   |
                                           | ghrr_cexp x m| q| 2 query banks,   |
                                           | transform mem| u| P codebook banks,|
                                           | matrix MAC   | e| P lanes, rsqrt,  |
                                           +--------------+ r| top-1 selector   |
                                                            y+------------------+
```

The DMA data words go straight from the DMA engine to the encoder (channel 0)
and to the inference block (channel 1), as in the architecture's block
diagram. The host interface does not carry data words. It steers each stream
by driving its ready signal and the matching write enable and address. The
encoder writes finished query words directly into the inference block's
query banks.

| module           | role |
|------------------|------|
| `ghrr_pkg`       | sizes, `cplx_t`, rounded complex multiply |
| `ghrr_top`       | wires the four blocks together. Ports: host bus, interrupt, external memory read port |
| `ghrr_host_if`   | register file, LOAD_TM / LOAD_CB / RUN commands, stream steering (handshakes, write enables, addresses), double-buffer coordination, 16-entry result queue |
| `ghrr_dma`       | two read channels sharing one memory port |
| `ghrr_encoder`   | complex exponential stage, transform memory, binding pipeline |
| `ghrr_cexp`      | 256-entry cos/sin ROM (the complex exponential stage) |
| `ghrr_inference` | query and codebook buffers, P-lane similarity, normalisation, top-1 |
| `ghrr_rsqrt`     | sequential reciprocal square root |
| `ghrr_fifo`      | synchronous FIFO (DMA channels, DMA tags, result queue) |

## The encoder pipeline

The encoder accepts one phase word per clock and has three stages:

1. **Lookup.** The `m` phases address `m` copies of the cos/sin ROM
   (`ghrr_cexp`). In the same clock the transform memory returns `Q_j` for the
   dimension being processed.
2. **Transform.** `U = Q_j * diag(e)` scales column `k` of `Q_j` by `e_k`:
   `m*m` complex multiplies, each rounded back to Q1.14.
3. **Bind (multiply-accumulate).** An `m x m` accumulator `R` is loaded with
   `U` on the first input of a dimension and replaced by `R * U` on each later
   one. That is `m^3` complex products per clock, summed at full precision and
   rounded once per entry. After the last input of the dimension, `R` is the
   output word for dimension `j`.

Because the accumulator updates in one clock, inputs can arrive back to back
with no hazard. The result for dimension `j` leaves three clocks after its
last input. `done_o` comes with the last dimension. There is no output
back-pressure. The coordinator only starts the encoder into a free query bank,
so the write into that bank can never be refused.

## The inference block: passes, snapshot and normaliser

The codebook buffer has `P` banks. Class `c` lives in bank `c mod P`, group
`c div P`. A search over `n` classes runs `ceil(n/P)` **passes**, one per
group. Each clock of a pass reads one dimension word of the query and the same
dimension of all `P` candidates of the group. Each of the `P` lanes then adds
8 products to its dot product and 8 squares to its candidate's squared norm. A
shared adder tree accumulates the query's squared norm. A pass over `D`
dimensions takes `D` clocks.

At the end of a pass the accumulators are copied into a **snapshot** and the
next pass starts at once. The normaliser works on the snapshot in the
background:

* on the first group of a query it computes `rq = 2^40 / isqrt(|q|^2)`;
* for each lane it computes `rc = 2^40 / isqrt(|c|^2)` with the same
  `ghrr_rsqrt` unit (24 clocks of square root, 41 of division);
* `t = (dot * rq) >> 40`, then `score = (t * rc) >> 26`, in Q1.14;
* the **top-1 selector** compares the score with the best so far. Classes at
  or above the class count are skipped.

The normaliser needs roughly `(P+1) * 70` clocks per pass. That is far below
`D` at real sizes, so it is hidden. At small `D` the last read of a pass
waits until the previous snapshot has been consumed. That wait is the only
stall in the block.

The query buffer has two banks. `qbuf_free_o` pulses as soon as the final
pass has read its bank, which is before the result is ready, so the
coordinator can hand the bank back to the encoder early.

## Coordination and double buffering (`ghrr_host_if`)

During RUN the coordinator keeps a *full* flag for each query bank:

* it starts the encoder on the write bank when that bank is empty; the
  encoder's `done_o` marks the bank full and switches the write bank;
* it starts a search on the read bank when that bank is full, the inference
  block is ready and the result queue has room for every result in flight;
  `qbuf_free_o` marks the bank empty and switches the read bank.

So query `n+1` is being fetched and encoded while query `n` is searched. At
the default sizes encoding a length-5 query takes `5*D` clocks and a 10-class
search `2*D`, so the search is hidden behind encoding. If the host leaves 16
results unread, searches pause until it reads one. The DMA channel then stops
too, once the encoder has nowhere to write.

### Register map

Word addresses on `host_addr_i`. Read data appears on `host_rdata_o` one clock
after `host_re_i`.

| addr | name        | access | meaning |
|------|-------------|--------|---------|
| 0    | CTRL        | W  | bit0 LOAD_TM, bit1 LOAD_CB, bit2 RUN |
| 1    | STATUS      | R  | bit0 LOAD_TM busy, bit1 LOAD_CB busy, bit2 RUN busy, bit3 result available, [15:8] results queued |
| 2    | TM_SRC      | RW | word address of the transforms |
| 3    | CB_SRC      | RW | word address of the codebook |
| 4    | IN_SRC      | RW | word address of the inputs |
| 5    | DIM         | RW | dimensions used, 1..DIMS (reset: DIMS) |
| 6    | SEQ_LEN     | RW | sequence length, 1..LMAX |
| 7    | NUM_CLASSES | RW | classes, 1..P*NG |
| 8    | NUM_QUERIES | RW | queries per RUN |
| 9    | RESULT      | R  | pops the queue: [31:24] class, [23:0] signed Q1.14 score; all ones when empty |

`irq_o` is high while results are queued. LOAD_TM and LOAD_CB may run at the
same time, on channels 0 and 1. A command is ignored while a load or run that
needs the same channel is still busy. A typical session: write the addresses
and sizes, write CTRL=1 and CTRL=2, poll STATUS until bits 1:0 are clear,
write CTRL=4, then read RESULT whenever `irq_o` is high.

## DMA engine

Each channel issues reads for consecutive word addresses and delivers the
words in order on a valid/ready stream. The channels share one memory port
through a round-robin arbiter. A tag queue records which channel each
outstanding request belongs to, and the memory's in-order responses are routed
by it. A channel requests only while its words in flight plus its FIFO
occupancy are below the FIFO depth (8). A response therefore always has room,
and the memory response needs no ready signal. The memory port is
`mem_req_valid/ready/addr`, plus `mem_rsp_valid/data` any number of clocks
later, in request order.

## Number formats and precision

* Elements: 16-bit two's complement, 14 fraction bits. Unitary entries have
  magnitude at most 1, so there is headroom for rounding.
* Complex products are computed exactly and rounded to nearest once per output
  entry. After five chained bindings, outputs stay within about 12 LSB of an
  exact real-valued computation from the same quantised inputs.
* Dot products are 49-bit signed and squared norms 48-bit unsigned, exact for
  `2*m*m*D = 64000` terms.
* The score matches an exact real-valued cosine to within a few LSB of Q1.14.

## Sizes at the default configuration

| store | size |
|-------|------|
| transform memory | 8000 x 128 bit = 1.0 Mbit |
| query buffer (2 banks) | 16000 x 128 bit = 2.0 Mbit |
| codebook buffer (8 banks x 2 groups) | 16 x 8000 x 128 bit = 16.4 Mbit |
| cos/sin ROMs | 2 x 256 x 32 bit |

The arrays are written as plain memories: one write port and one synchronous
read port each. A chip implementation would map them to SRAM macros.

## Departures and own choices

* **Own choices where the architecture is silent:**
  * the fixed-point format and the 8-bit phase;
  * the product order `Q_j * diag(e)`;
  * the dimension-major input order;
  * the three-stage encoder pipeline;
  * the on-chip codebook with `NG = 2` groups (up to 16 classes), chosen to
    hold the evaluated 10-class task;
  * the iterative reciprocal square root;
  * the snapshot scheme for overlapping normalisation;
  * the DMA protocol, arbitration and credits;
  * the whole register map and the command set;
  * the 16-entry result queue;
  * the two query banks;
  * the sequence-length limit `LMAX = 8` (the evaluated task uses 5).
* **Throughput is not the prototype's.** Each stage here handles one dimension
  word per clock (the encoder: 8 complex MACs plus 4 complex multiplies per
  clock; the inference block: 8 lanes x 8 products per clock). The prototype's
  peak throughput, area and power come from a 28 nm chip whose clock and
  datapath widths are not given. This RTL does not claim them. Wider datapaths
  (several dimension words per clock) are the obvious way to scale.
* **Encoder to inference link.** The architecture's block diagram links the
  DMA engine to the encoder and to the inference block, and shows no direct
  link between those two; its text has encoded vectors streamed to the
  inference buffers. Here the encoder writes its output words straight into
  the inference block's query banks, so queries never go back to external
  memory.
* **Memory attachment.** The architecture's block diagram draws the host
  interface as a shared bus that the host CPU, the external memory and all
  three on-chip blocks hang on. Here the host register bus and the memory
  read port are two separate ports of the top. The host CPU reaches only the
  registers, and only the DMA engine uses the memory port.
* **No on-chip training.** The codebook (the class vectors) is computed
  elsewhere and loaded with LOAD_CB. The architecture describes hardware for
  encoding and inference only, so no bundling or update datapath is built.
* **Not included:** the external memory and the host CPU. They connect through
  the top's memory and register ports.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_ghrr_cexp` | all 256 phases against `$cos`/`$sin` within 1 LSB; latency; hold |
| `tb_ghrr_encoder` | random unitary `Q_j` and phases against a real-valued reference, sequence lengths 1, 5 and 8; three-clock latency; one input per clock; a swapped input order changes the result |
| `tb_ghrr_rsqrt` | corner and random inputs against an integer reference; fixed latency |
| `tb_ghrr_inference` | class and score against a real-valued cosine over several class counts, both banks, class masking, single-pass timing, stalls while the normaliser is busy |
| `tb_ghrr_dma` | both channels with random memory latency and back-pressure; data order, counts, done pulses; one word per clock when unobstructed |
| `tb_ghrr_fifo` | random traffic against a queue model |
| `tb_ghrr_host_if` | register read-back, DMA commands, load addresses, bank alternation rules, encode/search overlap, result order, queue-full back-pressure |
| `tb_ghrr_top` | end to end at `DIM = 64`, 10 classes, length 5, 18 queries, against a real-valued model of the whole computation (see below) |
| `tb_ghrr_top_full` | the same at the default parameters (`D = 8000`), 18 queries; about 0.84 M clocks, a few seconds |
| `tb_ghrr_top_dsweep` | the same task on the default-size accelerator at D = 1000, 2000 and 4000 (set through the DIM register), 4 queries each |

The end-to-end tests build a 10-class task with sequence length 5 from random
symbols. The codebook holds the reference encoding of each class prototype,
and the queries are:

* exact prototypes, which score close to 1.0;
* prototypes with one symbol replaced. Product binding leaves these nearly
  orthogonal to every class, so they score around 0.05 to 0.1;
* one reversed prototype, which must score clearly below its own class.

The end-to-end tests also require each mechanism to occur at least once:

* memory back-pressure;
* both DMA channels active together;
* input fetch and encoding of a later query while an earlier one is searched;
* multi-group passes;
* result-queue back-pressure.

To run one with Verilator:

```
verilator --binary --timing --assert --top-module tb_ghrr_top_full \
    -y rtl -y tb +libext+.sv -Irtl rtl/ghrr_pkg.sv tb/tb_ghrr_top_full.sv
./obj_dir/Vtb_ghrr_top_full
```

Replace the module name to run any other testbench. All testbenches reset
every register they read, so they run the same under random initialisation
(`+verilator+rand+reset+2`).

## Changing the design

* `ghrr_pkg` holds the defaults: `DIM`, `M`, `P`, `NGRP`, `SEQ_MAX`, `DW`,
  `FRAC`, `PH_W`. `ghrr_top` takes `DIMS`, `PP`, `NG` and `LMAX` as
  parameters.
* The testbenches' reference models are written for `m = 2`. `M` itself is
  generic in the RTL.
* The run-time `DIM` register lets one build serve any `D` up to `DIMS`. The
  same hardware covers D = 1000, 2000, 4000 and 8000.
