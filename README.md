# Self-organizing-map vector quantizer for image compression

Vector quantization compresses an image by cutting it into small blocks,
treating each block as a vector, and sending the index of the closest entry
of a codebook instead of the pixels. With 4x4 blocks of 8-bit pixels and a
256-entry codebook, 128 bits of pixels become an 8-bit index (0.5 bit per
pixel). The expensive part is the search: every input vector has to be
compared with every code vector.

This RTL implements that search, and the training of the codebook, with one
small set of arithmetic units that serves both jobs. The codebook is seen as
a self-organizing map: each code vector is the weight vector of a neuron.

* **Encoding.** For every neuron j the squared Euclidean distance
  `SED_j = sum_i (x_i - w_ij)^2` is computed. Sixteen squared difference
  units (SDUs) produce the sixteen terms in parallel, an adder tree sums them,
  and a winner-takes-all circuit keeps the smallest SED and its index while
  the neurons stream past, one per clock cycle. The winner's index is the
  compressed output.
* **Learning.** After the search, the winner is moved towards the input:
  `w_ij <- w_ij + alpha * (x_i - w_ij)`. The SDUs switch their multiplier from
  squaring the difference to scaling it by alpha, and the adders of the tree
  are cut apart so that each adds one lane's weight and scaled difference.
  The new weights are written back to the codebook memory.
* **Decoding.** The code vector of an index is read out of the codebook.

## Default configuration

| parameter | default | meaning |
|---|---|---|
| `DW` | 16 | width of pixel and weight words (16-bit subtractor) |
| `D` | 16 | lanes: SDUs and adder-tree inputs, components per partial vector |
| `N` | 256 | code vectors (neurons) |
| `NPART` | 1 | partial vectors per input vector |
| `SW` | 38 | width of an SED |

The defaults live in `rtl/vq_pkg.sv`. A 4x4 block is 16 components, so with
the defaults each vector is one partial vector. Longer vectors are handled
as `NPART` partial vectors of `D` components; the adder tree then
accumulates partial distances (see below). 8-bit pixels are meant to be
presented in the upper byte of the 16-bit word (`pixel << 8`), which leaves 8
fractional bits so that learning can make moves smaller than one grey level.

## Block structure

```
                 x_data ──► vq_ctrl (input buffer, sequencer) ──► dp_x ─┐
                              │ rd_addr             │ s1, S_SEP, index   │
                              ▼                     │                    ▼
 cb_* load port ──► codebook_mem ── rd_data (w) ───────────────► 16 x sdu
                              ▲                     │                    │ term, w
                              │ write-back          │                    ▼
                              └──── upd_w ◄──────────────────────────  rcbat
                                                    │                    │ SED + S_SEP
                                                    └──── index ──►  mdsc ──► idx, win_dist
```

| file | block |
|---|---|
| `rtl/vq_pkg.sv` | default sizes, mode enum, SED width function |
| `rtl/sdu.sv` | squared difference unit, one per lane |
| `rtl/rcbat.sv` | reconfigurable complete binary adder tree |
| `rtl/mdsc.sv` | minimum distance search (winner-takes-all) circuit |
| `rtl/codebook_mem.sv` | codebook memory, one partial vector per word |
| `rtl/vq_ctrl.sv` | sequencer and input-vector buffer |
| `rtl/som_vq_top.sv` | top level |

## Pipeline

One partial weight vector enters per cycle:

| cycle | stage |
|---|---|
| 0 | `vq_ctrl` drives the codebook read address |
| 1 | codebook word and the matching partial input vector reach the SDUs; the subtractors work; the difference is registered |
| 2 | SDU multipliers and the adder tree; the tree's output register (and partial-SED accumulator) is loaded |
| 3 | with S_SEP, the exact SED is loaded into R1 of the search circuit |
| 4 | R1 is compared with R2 (the minimum so far); R2/R3 updated |

A search over all neurons takes `N*NPART + 6` cycles, counted from the cycle
after the last input beat to the index output: 262 cycles with the defaults,
so a 512x512 image (16384 blocks) takes about 4.3 million cycles. Learning
adds `NPART` read cycles and 3 cycles until the write-back.

## The squared difference unit (`sdu`)

Subtractor, register, multiplexer and multiplier. The 17-bit signed
difference `x - w` is registered; the multiplier's other operand is chosen by
`s1`: the difference again (s1 = 0, output `(x-w)^2`) or the learning rate
(s1 = 1, output `floor(alpha * (x - w) / 2^16)`). `alpha` is an unsigned
16-bit fraction and must be steady during a learning operation. The weight
and `s1` are registered next to the difference so that the tree receives
term, weight and mode together.

## The reconfigurable adder tree (`rcbat`)

This is the least obvious block. For `D` = 16 it has 16 adders: 15 form a
complete binary tree (8 + 4 + 2 + 1) and the 16th, at the root, accumulates.
Every adder has a multiplexer on each input.

* Encoding (`learn` = 0). The tree adds the 16 squared differences. The root
  adder adds that partial SED to the accumulator. The separation signal
  S_SEP (`sep`) marks the last partial vector of a neuron: until then the
  accumulator keeps the running sum; on the S_SEP beat the sum is the exact
  SED, it leaves on `sed` with `sed_valid`, and the accumulator restarts.
  With `NPART` = 1 every beat carries S_SEP.
* Learning (`learn` = 1). Each adder is disconnected from its children and
  adds one lane's weight and `alpha*(x-w)`: the eight first-level adders take
  lanes 0-7, the four second-level adders lanes 8-11, then 12-13, 14, and the
  root adder lane 15. All 16 updated weights come out together one cycle
  later. Learning beats do not disturb a partial SED in progress.

An update never leaves the 16-bit range: `w + floor(alpha*(x-w))` lies
between `w` and `x` for `0 <= alpha < 1`.

## The winner-takes-all search (`mdsc`)

R1 takes each exact SED together with its neuron index; a comparator and an
AND gate decide whether R1 is smaller than R2; if so, R2 takes the SED and R3
the index. The first SED after `clear` is always taken, and equal SEDs keep
the earlier (lower) index. A shift register of `LAT` = 2 stages carries the
index, issued by the sequencer with the neuron's last partial vector, so that
it meets its SED at R1. After `N` SEDs `win_valid` pulses with R3 (`win_idx`)
and R2 (`win_dist`). With `NPART` > 1 the codebook start address of the winner
is `win_idx * NPART`.

## Sequencer (`vq_ctrl`) and interface of `som_vq_top`

* Commands: `start` with `mode` (`MODE_ENCODE`, `MODE_LEARN`, `MODE_DECODE`)
  and, for decoding, `dec_idx`, accepted while `start_ready` is 1.
* Input vector: `NPART` partial vectors on `x_data` with `x_valid`/`x_ready`.
  An assertion checks that `x_valid` stays up until accepted.
* Results: `idx_valid` pulses with `idx` and `win_dist`. In learning mode the
  index is output first and `busy` stays high until the winner is written
  back. Decoded partial vectors appear on `dec_data` with `dec_valid`.
* Codebook load: `cb_we`, `cb_addr`, `cb_wdata` write the memory directly
  while the quantizer is idle (ignored while `busy`). Neuron n occupies words
  `n*NPART ... n*NPART+NPART-1`.
* Reset: `rst_n` is asynchronous, active low, and clears control and pipeline
  registers; the codebook memory is not reset.

## What is this design's own choice

The SDU, the reconfigurable tree with S_SEP, the R1/R2/R3 search circuit and
the encode/learn mode switch with `s1` are the design's. These parts are
choices made to complete it and may differ from other implementations of the
same idea:

* the register placement (one stage per block, as in the pipeline table);
* the learning-rate format (16-bit fraction, truncating) and updating only
  the winner, with no neighbourhood function;
* the lane-to-adder mapping of the tree in learning mode;
* the sequencer, the handshakes, the codebook load port and the decoding mode;
* tie-breaking towards the lower index;
* 16-bit words for 8-bit pixels, and `NPART` = 1 for 16-component vectors.

Not included: codebook generation by the Linde-Buzo-Gray (k-means-like)
algorithm, which is a software step; a codebook it produces can be loaded
through the load port, or the hardware can train its own with learning mode.

## Verification

Each block has a self-checking testbench in `tb/`; each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `sdu_tb` | both multiplier modes against 64-bit arithmetic, extremes, hold |
| `rcbat_tb` | SED sums with two partial vectors, learning lanes, learning beats between partials |
| `mdsc_tb` | random, tied and descending SEDs; winner and its timing |
| `codebook_mem_tb` | full write/read-back, hold, read-before-write |
| `vq_ctrl_tb` | address sequences, S_SEP, indices, s1, write-back, decode |
| `som_vq_top_tb` | end to end, N = 8, NPART = 2: encode, learn, decode against a reference model; search time; every mechanism counted |
| `som_vq_full_tb` | end to end with every parameter at its default (256 code vectors) |
| `som_vq_image_tb` | default configuration: a generated 512x512 8-bit image, 256-entry codebook trained on 2048 blocks, all 16384 blocks encoded and checked; prints the PSNR (about 40 dB on this synthetic image) |

The reference model used by the three end-to-end testbenches is in
`tb/som_vq_tasks.svh`. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module som_vq_image_tb rtl/vq_pkg.sv tb/som_vq_image_tb.sv
./obj_dir/Vsom_vq_image_tb
```

The image test simulates about 5 million cycles in a few seconds.

Lint notes: Verilator reports `SYNCASYNCNET` because the handshake assertion
samples the asynchronous reset, and `UNUSEDSIGNAL` for the per-lane copies of
`s1` of which only lane 0's is used.
