# SHyLoC-E style lossless compressor for hyperspectral images

A hyperspectral imager produces cubes of Nx x Ny pixels with Nz spectral bands,
far more data than a spacecraft downlink can carry. Two CCSDS standards define
lossless compression for such data:

* **CCSDS-121**: a block-adaptive Rice coder. Every block of J mapped residuals is
  coded with whichever option (fundamental sequence, sample splitting with k LSBs,
  second extension, zero-block, or no compression) gives the shortest bits. It has
  an optional unit-delay predictor that turns raw samples into residuals.
* **CCSDS-123**: an adaptive 3-D predictor. It predicts each sample from its
  spatial neighbours and from the P previous bands, using weights that adapt
  sample by sample. Its mapped residuals can then be coded by the CCSDS-121 coder.

This RTL implements both, with the extensions that make them usable in a real
on-board system:

1. The CCSDS-121 core gets the unit-delay predictor. This forces *reference
   samples*: periodically, a raw sample is sent so that the decoder can restart.
   Every coding option has to treat the block that carries one specially.
2. The CCSDS-123 core keeps its largest buffer, the "top-right" neighbour FIFO
   (a whole spectral row), in external memory over AHB. Two architectures do this,
   chosen at compile time:
   * **BIP-MEM**: samples arrive band-interleaved by pixel.
   * **BIL-MEM**: samples arrive band-interleaved by line.

   The AHB master uses **incremental bursts of up to 16 beats**, with reads and
   writes interleaved, instead of single transfers that re-arbitrate for every
   word.
3. The CCSDS-123 weights can be initialised from **custom vectors**. These are
   loaded into the same FIFO that holds the adapted weights during compression.
4. The CCSDS-123 core has its own **sample-adaptive entropy coder**. Its output is
   either mapped residuals, or codewords from that coder.

The top level, `shyloc_e_top`, holds both cores. Two select inputs set how they
work together:

* **Chained** (`sel_123_to_121 = 1`): the CCSDS-123 residuals go into the
  CCSDS-121 coder, whose preprocessor is then bypassed.
* **Side by side** (`sel_123_to_121 = 0`): the two cores run on separate streams.
  The CCSDS-123 core then outputs its residuals on `res_*` (`sel_sa = 0`) or
  sample-adaptive codewords on `sa_*` (`sel_sa = 1`).

## Block map

```
          s_data (BIP or BIL)                          x_data
                 |                                        |
   +-------------v--------------------+                   |
   | ccsds123_bipmem (or _bilmem)     |                   |
   |  FIFO current --+                |                   |
   |  to-AHB FIFO -> ahb_master <==AHB==> external memory |
   |  from-AHB FIFO (top right)       |                   |
   |  delay_fifo x3: left, top,       |                   |
   |                 top left         |                   |
   |  weight_storage (custom mux)     |                   |
   |  ccsds123_pred_core              |                   |
   +-------------+--------------------+                   |
                 +--> ccsds123_sa_coder --> sa_*          |
                 | residuals (res_*)                      |
                 +-------- sel_123_to_121 ----------------+
                                  |
   +------------------------------v------------------------------+
   | ccsds121_ip                                                 |
   |  ud_predictor (register, subtract, mapper, reference bypass) |
   |  ccsds121_coder: block buffer, compute_lk, snd_extension,   |
   |                  option_coder, fs_coder, bit_packer         |
   +------------------------------+------------------------------+
                                  | 32-bit words (cw_*)
```

All streams use valid/ready handshakes. There is one clock and an active-low
asynchronous reset. Shared types are in `rtl/shyloc_pkg.sv`.

## CCSDS-121 part

### Unit-delay predictor (`ud_predictor`)

The predictor holds the previous sample and forms the difference to the current
one. It maps the difference to a non-negative integer with the standard CCSDS-121
mapper:

    theta = min(x_pred - x_min, x_max - x_pred)
    delta = 2*|d|           if |d| <= theta and d >= 0
            2*|d| - 1       if |d| <= theta and d < 0
            theta + |d|     otherwise

Signed inputs use the two's-complement range. The first sample of every
`cfg.ref_interval`-th block goes through unchanged and is flagged `out_ref`. With
`cfg.preproc_en = 0` the input is taken to be residuals already and passes through.

### Coding a block with a reference sample

This is the subtle part of the coder. When a block starts with a reference sample:

| option | treatment |
|---|---|
| FS / sample splitting | the reference sample costs D bits and is neither coded nor split |
| second extension | the first sample is replaced by 0 when forming the first pair's gamma |
| zero-block | the reference sample is ignored in the "all zero" test |
| no compression | unchanged |

In every case the reference sample is written raw, directly after the option
identifier. The length calculation follows these rules:

* `compute_lk` accumulates, one sample per cycle, the lengths for all k from 0 to
  k_max (13 for D = 16) in parallel. It also tracks the all-zero flag.
* `snd_extension` forms gamma = (a+b)(a+b+1)/2 + b for each pair and accumulates
  the second-extension length.

`option_coder` adds the identifier lengths and picks the shortest option. Ties
go to splitting, then second extension, then no compression. For D = 16 the
identifiers are 4 bits:

* k gives k+1, so FS (k = 0) is 0001.
* No compression is 1111.
* Zero-block and second extension share 0000, followed by one more bit: 0 for
  zero-block, 1 for second extension.

`fs_coder` then writes the block as a sequence of `{bits, len}` fields:

* FS codes first. Long runs of zeros are split into 32-bit chunks.
* The split LSBs of all samples next.
* Or the gammas, or the raw samples, depending on the option.

`bit_packer` packs the fields MSB-first into 32-bit words. A flush zero-pads the
last word.

### Zero-block runs (`ccsds121_coder`)

All-zero blocks are collected into a run rather than coded one by one. A run ends
at any of these:

* a non-zero block,
* a block that carries a reference sample,
* the end of a 64-block segment,
* the end of the data.

A run of c blocks is sent as the zero-block identifier followed by an FS code of
value c-1 (c <= 4) or c (c >= 5). If a run of five or more ends at a segment or
data end, it is sent as "remainder of segment" (FS value 4). An incomplete last
block is padded with zero residuals.

The coder takes J cycles to receive a block, decides in a few cycles, then needs
one cycle per output field. The input is held off meanwhile, because the block
buffer is single.

## CCSDS-123 part: BIP-MEM

### Neighbours and memory traffic

In BIP order, each sample needs these neighbours:

* **W** (west): the sample Nz positions earlier.
* **N** (north): Nx*Nz positions earlier.
* **NW** (north-west): (Nx+1)*Nz positions earlier.
* **NE** (north-east): (Nx-1)*Nz positions earlier, the "top right".

Only the top-right stream has to span a whole spectral row. It is therefore kept
off chip, and the rest derive from it with on-chip delay lines of length Nz
(`delay_fifo`):

* current stream -> **FIFO left** -> W
* top-right stream -> **FIFO top** -> N
* N -> **FIFO top left** -> NW

Every input sample is pushed into the *FIFO current* and into the *to-AHB* FIFO.
The AHB master writes the samples to memory in order and reads them back in the
same order into the *from-AHB* FIFO. Memory is a ring of 2^18 32-bit words, one
sample per word. Reads start once one full spectral row (Nx*Nz samples) is in
memory, and each read burst stays at least one row behind the writes. From sample
(Nx-1)*Nz on, each predicted sample takes one word from the from-AHB FIFO. The
word is discarded in the last column, which has no top-right neighbour. An image
therefore costs N writes and N-(Nx-1)*Nz reads, where N = Nx*Ny*Nz.

The FIFO current is Nz + 4*BURST deep. This lets the input run one pixel and two
bursts ahead of the prediction, which the one-row distance requires.

### AHB master (`ahb_master`)

Each burst works as follows:

1. The master raises HBUSREQ.
2. It waits for HGRANT together with HREADY.
3. It issues one NONSEQ beat and then SEQ beats, with the normal one-cycle
   address/data pipeline and HREADY wait states.

Write and read bursts alternate whenever both are possible. A burst is started
only when the coupling FIFO can supply or accept all of its beats. Bursts are
BURST beats long (INCR16 by default). Near the end of the data the master falls
back to INCR8, INCR4, INCR or SINGLE. Because BURST is a power of two and
addresses are aligned, a burst never crosses a 1 KB boundary. Setting BURST = 1
gives the single-transfer behaviour of the original core. HRESP is not checked:
the memory is assumed to answer OKAY.

### Prediction step (`ccsds123_pred_core`)

This is a combinational implementation of the CCSDS-123 (Issue 1) predictor in
full prediction mode with neighbour-oriented local sums. Its steps are:

* local sum
* central and three directional local differences
* predicted central difference (weights x differences)
* scaled predicted sample with register size R
* clipped prediction
* mapped residual
* weight update, with a scaling exponent that grows from VMIN to VMAX every
  2^TINC_LOG samples

The previous P central differences of the same pixel come from a shift register.
Because the step is combinational, one sample is predicted per cycle whenever its
data are present. In practice the rate is bounded by the bus, which needs two
beats per sample.

### Weights (`weight_storage`)

The weight store holds one vector per band, each of P+3 weights. The bands are
read in turn, updated and written back. A multiplexer selects between two sources
for what is written:

* the updated vector, during compression;
* a custom vector from `wload_*`, during configuration.

On the first pixel, each band uses either the default initial vector or the
stored custom one, depending on `cfg_custom_w`:

* The default vector sets band z-1 to 7/8 * 2^OMEGA. Each further band gets 1/8 of
  the previous one, and the directional weights are 0.
* The stored contents survive `start`, so weights from a previous image can be
  reused as the custom start values.

## CCSDS-123 part: BIL-MEM (`ccsds123_bilmem`, top parameter `BIL = 1`)

In band-interleaved-by-line order, sample s(z,y,x) is at index (y*Nz + z)*Nx + x.
A spectral row is still Nx*Nz samples. The top-right neighbour is Nx*Nz-1 samples
back, so the same AHB master, coupling FIFOs and one-row gap serve it unchanged.
The spatial neighbours become cheap, and the spectral context becomes expensive:

* **W** is the previous sample. **N** and **NW** are the top-right values of the
  previous and the second-previous sample. Each is a single register.
* The same pixel one band down is Nx samples back. A delay line of Nx samples
  gives s(z-1,y,x).
* The central differences of bands z-1 to z-P are a chain of P delay lines of Nx
  differences each.
* A band's weight vector is used for Nx consecutive samples. It is kept in a
  working register along the line. It is fetched from the weight FIFO at x = 0
  (or set to the default or custom start vector on the first line). It is
  written back at x = Nx-1.

An image costs N writes and N-(Nx*Nz-1) reads. The FIFO current needs only
4*BURST+4 entries here, because the look-ahead required by the gap is one sample
rather than one pixel.

## CCSDS-123 sample-adaptive coder (`ccsds123_sa_coder`)

Each band has an accumulator (Sigma) and a counter (Gamma).

* **First residual of a band.** It is sent as D raw bits. The band's counter
  starts at 2^GAMMA0 and its accumulator at (3*2^(KZ+6) - 49) * Gamma / 128.
* **Each later residual.** The coder picks k, the largest value from 1 to D-2
  with Gamma * 2^k <= Sigma + 49*Gamma/128 (or 0 if none qualifies). Let
  u = delta >> k. If u < UMAX, the codeword is u zeros, a one, and the k low
  bits of delta. Otherwise it is UMAX zeros followed by delta in D bits.
* **Statistics update.** After coding, delta is added to Sigma and Gamma counts
  up. When Gamma reaches 2^GAMMA_STAR - 1, both are halved, rounding up.

The coder tracks the band of each residual from the sample order, so it works
behind either predictor. A codeword that fits in 32 bits goes to the packer as
one field. Longer ones go as two fields, which costs one extra cycle. The output
words are 32 bits wide and the last one is zero padded.

The parameter defaults are UMAX = 18, GAMMA0 = 1, GAMMA_STAR = 6 and KZ = 3. No
header is produced.

## Parameters

| parameter | default | meaning |
|---|---|---|
| NX_MAX, NY_MAX, NZ_MAX | 512, 1024, 256 | largest image (size set at run time on cfg_nx/ny/nz, Nx >= 2) |
| D | 16 | sample width (bits) |
| P | 3 | previous bands used in prediction |
| OMEGA | 13 | weight resolution |
| R, VMIN, VMAX, TINC_LOG | 32, -1, 3, 6 | CCSDS-123 register size and weight-update schedule |
| BURST | 16 | AHB burst length |
| J | 32 | CCSDS-121 block size |
| BIL | 0 | CCSDS-123 architecture: 0 BIP-MEM, 1 BIL-MEM |

The CCSDS-121 IP (`ccsds121_ip`) also works with D up to 32 bits. From 17 bits
on, the option identifiers are 5 bits wide and splitting goes up to k = 29.

The predictor needs on-chip storage of about (NZ_MAX + 4*BURST) + 3*NZ_MAX
samples plus NZ_MAX weight vectors. The external ring must hold at least one
spectral row plus two bursts.

## Departures and open points

* **No headers.** No CCSDS-121 or CCSDS-123 header is generated; all code
  streams start with the first coded data.
* **Not included.** The configuration core (AHB slave registers, clock-domain
  adaptation, configuration checks), control module and output dispatcher of
  the CCSDS-123 IP are not part of this RTL. Configuration arrives on plain
  ports.
* **Own choices, not fixed by the standards.** These details follow the CCSDS
  standards where those fix them. Everything else is a design choice:
  * the R, VMIN, VMAX and TINC_LOG values;
  * the sample-adaptive coder constants;
  * the tie-breaking order between coding options;
  * zero-padding of a short last block;
  * the ring addressing;
  * re-requesting the bus for every burst.
* **Tested widths.** The CCSDS-123 predictors are tested at D = 16 only. The
  CCSDS-121 IP is tested at 16 and 32 bits.
* **Input only.** There is no separate treatment of byte order for wide samples:
  samples enter as D-bit words.
* **Image sizes.** Of the sensor sizes these defaults target, a 512 x 680 x 224
  and a 512 x 1024 x 256 image fit. A 1024-pixel-wide or a 1501-band image needs
  NX_MAX or NZ_MAX raised.
* **Bus-bound rate.** Each sample is one 32-bit AHB word, written once and read
  once, on the core clock. The predictors therefore cannot exceed 0.5 samples per
  cycle: with 16-beat bursts and no wait states they reach about 0.43. Packing two
  16-bit samples per word, or a faster bus clock, would lift that limit. Neither
  is done here.
* **Throughput.** The CCSDS-121 coder is not pipelined across blocks. When chained
  behind the predictor it back-pressures it: about 0.29 samples per cycle in the
  full-size run, against about 0.43 for the predictor alone with 25 % memory
  wait states.

## Verification

Each block has a self-checking testbench in `tb/`. Each compares the block with
independent models in `tb/shyloc_ref_pkg.sv`: a bit-exact CCSDS-121 encoder, the
unit-delay preprocessor, a CCSDS-123 predictor written straight from the
equations, and a sequential sample-adaptive coder. `tb/ahb_mem_model.sv` is a behavioural AHB slave memory. Its grant is
delayed by one cycle and it inserts random wait states.

| testbench | what it shows |
|---|---|
| tb_ud_predictor, tb_compute_lk, tb_snd_extension, tb_option_coder, tb_fs_coder, tb_bit_packer | each coder sub-block against the reference formulas, including reference-sample blocks |
| tb_ccsds121_coder, tb_ccsds121_ip | bit-exact streams for random and structured data; all four options, zero runs, remainder of segment, short last block, signed input |
| tb_ccsds123_pred_core, tb_weight_storage, tb_delay_fifo, tb_sync_fifo | arithmetic and storage blocks |
| tb_ahb_master | protocol, one-row gap, burst lengths and count, wait states |
| tb_ccsds121_wide | the CCSDS-121 IP built with D = 32 |
| tb_ccsds123_sa_coder | sample-adaptive coder in both sample orders, against a sequential model; counter rescaling and escape codewords |
| tb_ccsds123_bipmem, tb_ccsds123_bilmem | residuals against the model with default and custom weights; INCR16 vs single transfers (on a 1920-sample image: about 4440 vs 17700 cycles, about 220 bursts) and a minimum rate |
| tb_shyloc_e_top | chained, side by side, and with the sample-adaptive coder; counts bursts, wait states, stalls, reference samples, each coding option and each weight mode, and fails if any never happened |
| tb_shyloc_e_bil | the same end-to-end operations with the top built as BIL-MEM |
| tb_shyloc_e_workloads | sensor-shaped synthetic images through the default top: 512 x 6 x 224 at 16 bits, 512 x 24 x 6 at 8 bits, 90 x 135 x 64 at 14 bits; codewords and exact bus beat counts; about 0.28 to 0.30 samples per cycle |
| tb_shyloc_e_full | the top with its default parameters, chained, on a 512 x 16 x 256 image (2,097,152 samples). It checks every codeword and the exact number of bus beats and bursts. |

To simulate one testbench with Verilator (5.x):

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
        rtl/shyloc_pkg.sv tb/shyloc_ref_pkg.sv rtl/*.sv tb/ahb_mem_model.sv \
        tb/tb_shyloc_e_top.sv --top-module tb_shyloc_e_top
    ./obj_dir/Vtb_shyloc_e_top

Every testbench ends with the line
`TB_RESULT checks=<n> failures=<m>` and has a watchdog that counts a failure if
it hangs. The full-size run takes about ten seconds of simulation on a desktop.
