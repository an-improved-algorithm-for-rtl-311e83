# RLE-VLC compression of pixel-detector hits

A hybrid pixel readout chip for the HL-LHC trackers reads out, for every
trigger, only the *regions* (groups of four horizontally adjacent pixels)
that hold at least one hit. The conventional readout sends each active
region as a 32-bit word: a 7-bit column address, a 9-bit row address and four
4-bit Time-over-Threshold (ToT) values. That format handles sparsity well,
but it spends a full address on every region even though hits come in
clusters, and it spends four bits on every ToT even though most of them are
zero.

This RTL replaces that format with a lossless, context-dependent prefix code
that

* addresses a **cluster** of regions once, and codes the inactive regions
  inside it as **run lengths** (RLE);
* codes ToT values with a small **variable-length code** (VLC): one bit for
  the most frequent value, two bits for the second, six bits for the rest;
* chooses, region by region, whichever of the VLC and the plain four-ToT
  format is shorter.

It works column by column ("intra-column mode"): each 8-pixel-wide core
column is scanned on its own. The repository holds the compressor as it would
sit in the chip periphery, between the core-column FIFOs and the serial
output, and the matching decompressor for the receiving end.

On the worked example below (one cluster of 9 active regions) the code takes
161 bits where the 32-bit format takes 288 (ratio 1.79). On recorded physics
hit patterns a ratio of about 1.57 has been reported for this scheme; the
testbenches here use synthetic patterns and do not reproduce that figure.

## Geometry and scan order

The matrix is 400 pixels wide and 192 high, split into core columns 8
pixels wide. Each core column is a stack of 24 cores of 8x8 pixels, and each
core holds 16 regions of 4x1 pixels: region number = 2*row + half, where half
is 0 for the left four pixels and 1 for the right four. Regions are scanned
left half then right half, row by row from the top, core by core from the
top. A region's **linear position** inside its column is `core*16 + region`,
so runs pass freely from one core into the next.

Inside a region, pixel 0 is the leftmost one and is coded first.

## The code

Field widths: `Bc` column bits, `Bk` core bits, `Br` region bits, `Bp` ToT
bits, `Brun` run bits. Defaults: Bc=6, Bk=6, Br=4, Bp=4, Brun=3.

| Symbol | Bits | Meaning |
|---|---|---|
| C,col | `col` (Bc) | first cluster of a column |
| K,core,reg | `core` (Bk) `reg` (Br) | address of a cluster's first region |
| F | `1` | another active region follows (not used for the first region of a cluster) |
| T,a,b,c,d | `1` + 4 x Bp | region in plain format |
| H | `0` | region in VLC format, followed by 4 pixel codes |
| V1 | `0` | pixel equal to the most probable value (ToT 0) |
| V2 | `11` | pixel equal to the second most probable value (ToT 2) |
| V,v | `10` + Bp | any other pixel value |
| R,n | `0` + n (Brun) | n inactive regions, 1 <= n <= 2^Brun-2 |
| EOK | `0` + all ones | end of cluster |
| EOC | `0` + all zeros | end of column (replaces the EOK of its last cluster) |

The code is prefix-free only in context. The grammar of one event is

```
event   := column*
column  := C cluster (EOK cluster)* EOC
cluster := K region (R* F region)*
region  := T a b c d | H pix pix pix pix
pix     := V1 | V2 | V v
```

Columns without hits produce nothing, so a column address appears only for
columns that have hits.

### Choosing the region format

With N1 pixels at the most probable value and N2 at the second, the VLC
region costs `1 + N1 + 2*N2 + (4-N1-N2)*(2+Bp)` bits and the plain region
`1 + 4*Bp`. VLC is shorter exactly when `N1*(1+Bp) + N2*Bp > 2*4`. The coder
uses VLC only when it is strictly shorter; a tie goes to the plain format.

### Keeping a gap inside a cluster or starting a new one

Let D be the number of inactive regions between two active regions of the
same column, and `LRmax = 2^Brun - 2` the longest run one R symbol can hold
(6 by default; the run values 0 and 2^Brun-1 are taken by EOC and EOK). The
gap costs `(1+Brun)*ceil(D/LRmax)` bits as runs, against `Bk+Br` bits for a
new cluster address. When the runs are strictly cheaper the gap stays inside
the cluster, coded as `ceil(D/LRmax)` R symbols of at most LRmax each, and the
next region is announced by F. Otherwise the cluster is closed with EOK and
the next region starts a new cluster with K (no F). With the defaults, gaps of
up to 12 regions are kept (two R symbols, 8 bits, against 10 bits of address).

The comparison leaves out the EOK that closing a cluster also costs, so
slightly longer gaps would still pay off as runs; the rule is kept as it is
because the decoder does not depend on it and the compression figures quoted
above use it.

### Worked example

A cluster in column 12 starts at core 22, region 9 and ends at core 23,
region 8. Its nine active regions hold the ToT values

```
core 22 r9 : 4 0 0 0        core 23 r0 : 4 0 0 0
core 22 r11: 1 5 0 0        core 23 r1 : 0 0 0 3
core 22 r13: 0 7 5 0        core 23 r2 : 14 4 0 0
core 22 r15: 15 13 3 5      core 23 r4 : 0 4 2 0
                            core 23 r8 : 0 0 0 5
```

and it is coded (dashes between symbols)

```
001100 - 0101101001 - 0 - 100100 - 0 - 0 - 0 - 0001 - 1 - 0 - 100001 - 100101 - 0 - 0 -
0001 - 1 - 0 - 0 - 100111 - 100101 - 0 - 0001 - 1 - 11111110100110101 - 1 - 0 - 100100 -
0 - 0 - 0 - 1 - 0 - 0 - 0 - 0 - 100011 - 1 - 0 - 101110 - 100100 - 0 - 0 - 0001 - 1 - 0 -
0 - 100100 - 11 - 0 - 0011 - 1 - 0 - 0 - 0 - 0 - 100101 - 0111
```

that is C,12; K,22,9; H V,4 V1 V1 V1; R,1; F H V,1 V,5 V1 V1; R,1; ...;
F T,15,13,3,5 (the only region where the plain format is shorter); F H ...;
R,3; F H V1 V1 V1 V,5; EOK. 161 bits in all. If it is the last cluster of
its column the final `0111` becomes `0000` (EOC). The testbenches check this
stream bit for bit.

## Hardware

```
 wr_* (per column) ──► region_fifo x NCOLS ──► column_sequencer ──► intra_column_encoder ──► bit_packer ──► link_* (64-bit words)
                                                                       │ (region_coder)                       │
                                                                                                               ▼
                                                                            dec_* ◄──────────────── rlevlc_decoder
```

| Module | Role |
|---|---|
| `rlevlc_pkg` | default field widths, symbol-kind enum `sym_t`, small helpers |
| `region_fifo` | one per core column: synchronous show-ahead FIFO of active regions (`core, reg, tot`) |
| `column_sequencer` | on `evt_start`, drains column 0, 1, ... NCOLS-1 in turn, then sends one end-of-event beat |
| `intra_column_encoder` | cluster former: applies the gap rule and emits one codeword per cycle |
| `region_coder` | combinational coder of one region (F/T/H/V1/V2/V), used inside the encoder |
| `bit_packer` | concatenates codewords MSB first into 64-bit words |
| `rlevlc_decoder` | parses the words back into regions |
| `rlevlc_top` | all of the above wired together |

### Event framing

An event is whatever the FIFOs hold when `evt_start` is pulsed. The FIFOs
must not be written while `busy` is high (an assertion checks this). The
sequencer forwards each FIFO's entries tagged with the column number and
finishes with an end beat; the encoder closes the open column with EOC and
passes a zero-length "last" codeword to the packer, which then sends its
remaining bits as a final word with `link_last` set and `link_nbits` giving
the number of valid leading bits (the rest is zero padding). All other words
are full (`link_nbits` = 64). An event with no hits gives one word with
`link_nbits` = 0, and so does the end of an event whose bits fill the last
full word exactly (the closing codeword has no bits of its own). The
end-of-event marking is this design's own framing: the code itself has no
end-of-event symbol, so the receiver relies on the last flag and bit count.

### Encoder state machine

The encoder accepts one input beat in its idle state and then walks through
the codewords it implies, one per cycle when the packer is ready:

* first region of the event, or of a new column: (EOC of the previous column)
  C, K, region without F;
* same column, gap 0: region with F;
* same column, gap kept: R (repeated while the gap exceeds LRmax), region with F;
* same column, gap too long: EOK, K, region without F;
* end of event: (EOC) and the zero-length last codeword.

Because the encoder only learns that a column is finished when a region of
another column (or the end beat) arrives, the EOC is emitted at that point.
Regions must arrive in increasing position within a column and columns in
increasing order; an assertion checks this. `code_sym` labels each codeword
for monitoring.

### Throughput and latency

* Encoder: one cycle to accept a region plus one cycle per codeword it
  causes. A region adjacent to the previous one costs 2 cycles; a region
  after a kept gap 3 or more; the first region of a column 4 (C, K, region
  plus accept) and one more for the previous column's EOC.
* Sequencer: one cycle for every column it leaves and one for the end beat,
  at most NCOLS+1 cycles per event, partly hidden behind the encoder's work.
* Packer: a word leaves in the cycle after it fills and the input is stalled
  during that cycle. No codeword exceeds 26 bits, so at most one word fills
  per codeword.
* Decoder: one symbol per cycle, a whole region (plain or VLC) counting as
  one symbol, so a region takes 1 cycle plus 1 for its F, a run 1 cycle,
  which is about the encoder's own pace.

No clock frequency is assumed anywhere; whether the encoder keeps up with a
given trigger rate depends on the clock and the hit occupancy (see below).

### Decoder

The decoder keeps a 128-bit buffer, refilled with a whole 64-bit word
whenever at most 64 bits remain, and a state that says which symbol may come
next (column address, cluster address, region, or the F/R/EOK/EOC choice
after a region or a run). A region is parsed in one cycle by a chain of four
pixel-code decoders over the top 25 bits of the buffer; it is consumed only
when the buffer holds all the bits the parse used. It tracks the position of the
next region: set by K, +1 after each region, +n after each run. When the last
word has been taken and no bits remain where a column address would start,
it emits an end beat.

## Parameters

`rlevlc_top` parameters, with their defaults:

| Parameter | Default | Meaning |
|---|---|---|
| NCOLS | 50 | core columns (400 pixels / 8) |
| NCORES | 24 | cores per column (192 rows / 8), used by an assertion only |
| BC, BK, BR, BP, BRUN | 6, 6, 4, 4, 3 | field widths of the code |
| NPIX | 4 | pixels per region (the RTL follows it; the testbenches assume 4) |
| V1_VAL, V2_VAL | 0, 2 | the two ToT values with short codes |
| FIFO_DEPTH | 32 | entries per core-column FIFO |
| OUT_W | 64 | link word width |

Region address width BR must be 4 (16 regions per core) for the linear
position to match the geometry above. BK=6 addresses up to 64 cores,
although 24 are used; a 5-bit core field would save one bit per cluster.

## Verification

Each block has a self-checking testbench in `tb/`; they print
`TB_RESULT checks=N failures=M` and stop. `rlevlc_ref_pkg` is a software
model of the code, written from the rules above rather than from the RTL,
and supplies expected bitstreams and random events (mostly ToT 0, often 2,
clusters with small and occasionally long gaps).

| Testbench | What it checks |
|---|---|
| `tb_region_coder` | all 65536 ToT combinations, with and without F, against the model; the printed plain-format region |
| `tb_intra_column_encoder` | the worked example bit for bit; the gap rule at 12 and 13 inactive regions; 300 random events with backpressure; cycle count = codewords + input beats |
| `tb_bit_packer` | random codeword streams with random gaps and stalls; word count, last flag, bit count, cycle count |
| `tb_region_fifo` | random push/pop against a queue, through full and empty |
| `tb_column_sequencer` | column order, tags, end beat, cycle count (entries + columns + 1) |
| `tb_rlevlc_decoder` | the example, an empty event and random events decoded back under backpressure |
| `tb_rlevlc_workload` | 342 synthetic triggers of about 81 active regions each at the default size: bits against the model, decoded regions, a bound on cycles per trigger; reports compression ratio and mean cycles |
| `tb_rlevlc_top` | full default size, end to end: link bits equal the model, decoded regions equal the written ones; counts VLC and plain regions, runs, split runs, EOK, EOC, packer stalls, link holds, output backpressure and empty events, and fails if one never happened |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/rlevlc_pkg.sv tb/rlevlc_ref_pkg.sv tb/tb_rlevlc_top.sv --top-module tb_rlevlc_top
./obj_dir/Vtb_rlevlc_top
```

Replace the last file and the top module name for the other testbenches.
`tb_rlevlc_top` runs 200 events at the default size in a few seconds; it
reaches into the encoder and packer by hierarchical name to count events.

## What is not here, and what to trust

* **Inter-column mode.** Clusters spanning several core columns, with a
  width field after K, are a variant of the scheme with a small extra gain;
  how such clusters are scanned and delimited is not defined well enough to
  build, so only the intra-column mode exists.
* **Serial output.** The 64-bit words are meant as the payload of an Aurora
  64b/66b link (1 to 4 lanes of 1.28 Gb/s); the Aurora framing, lanes and
  serializers are not included.
* **Pixel matrix and trigger logic.** The `wr_*` ports stand for the
  core-column logic that copies triggered regions into the FIFOs.
* **Own choices** (not dictated by the code itself): FIFO depth and
  show-ahead behaviour; event framing with `evt_start`/`busy`; the last flag
  and bit count on the link; one-codeword-per-cycle scheduling; a tie in the
  region-format rule going to the plain format; gaps longer than LRmax split
  into maximal runs; synchronous active-low reset everywhere.
* **Bandwidth.** At a reported average of about 0.0216 bits per pixel per
  trigger, a 76 800-pixel chip sends about 1.66 kbit per trigger, 1.66 Gb/s
  at a 1 MHz trigger rate, which fits four 1.28 Gb/s lanes. On the synthetic
  workload of `tb_rlevlc_workload` (about 84 active regions per trigger) an
  event takes about 300 cycles from `evt_start` to its last link word (333 at
  most). At a 1 MHz trigger rate that means a clock of about 300 MHz; a design aimed at
  that rate would need an encoder that emits several codewords per cycle, or
  several encoders working on different columns.
* **Compression on synthetic data.** The same workload compresses by 1.46
  against 32 bits per region (0.024 bits per pixel). Its clusters and ToT
  values are invented, so this number says nothing about physics data.
