# Hyperdimensional-computing classifier on an FPGA

Hyperdimensional computing (HDC) classifies data by mapping each input into a
very long vector, a *hypervector*, and comparing it with one hypervector per
class. This RTL implements three FPGA accelerators for such a classifier on
28x28 images. The model uses D = 2000 dimensions and 10 classes. Each
accelerator is a separate design; they share their building blocks:

| design | what it does | encoder | back end |
|---|---|---|---|
| inference (`hdc_infer_kernel`) | image in, predicted class out | 25 compute units, 80 dims each | dot-product similarity + argmax |
| single-pass training (`hdc_train_kernel`) | labelled images in, class hypervectors out | 8 compute units, 250 dims each | adds each hypervector into its class |
| NeuralHD training (`hdc_neuralhd_kernel`) | encode, retrain, regenerate dimensions | 1 unit, all 2000 dims | perceptron-style retraining + dimension regeneration |

`hdc_fpga_top` places the three designs side by side, each with its own ports
(`inf_*`, `spt_*`, `nhd_*`). In a real system each would be built on its own.
The host computer is not part of the RTL. It supplies feature vectors, labels
and the initial model, normalises the trained classes, and picks the
dimensions to regenerate.

## The encoder

Every design starts with the same encoding. Each dimension i has a random
basis vector B_i (784 entries) and a random phase b_i. A feature vector F
becomes the hypervector H with

    h_i = cos(B_i · F + b_i) · sin(B_i · F)

This is a random-feature (RBF-kernel style) encoding. All dimensions are
independent, so the work splits across compute units. Each
`hdc_encoder_cu` owns a contiguous slice of dimensions and keeps its part of
the basis in a local memory.

Inside one unit:

1. **Feature load.** The feature vector arrives as 49 beats of 16 words
   (`NROWS = ceil(N_FEAT/LANES)`) and is held in a register buffer.
2. **MAC.** Each clock reads one 16-word basis row and does 16
   multiply-accumulates against the matching feature row. One dot product
   takes 49 clocks. The accumulator is 64 bits wide and exact: a Q15.16 by
   Q15.16 product is a Q.32 value.
3. **Angle.** The dot product, in radians, is multiplied by
   round(2^32/2π) = 683565276. Bits [63:32] of that product are the angle in
   *turns*, where 2^32 is one full circle. Wrap-around modulo 2π then comes
   free from the 32-bit overflow. The phase b_i is stored in turns and simply
   added.
4. **Trig.** Two iterative CORDIC units (`hdc_cordic`, 20 micro-rotations)
   compute cos(x+b) and sin(x) together. Their Q1.30 product, shifted right
   by 44, is the Q15.16 element h_i.

The trig stage takes about 25 clocks and overlaps the next dimension's MAC.
While NROWS ≥ 25 the unit therefore delivers one element every NROWS clocks.
A dimension's final basis row is issued only if the "finished dot product"
register will be free when that row completes. With small test sizes
(NROWS < 25) the MAC then waits for the trig stage. At the default sizes it
never waits.

Timing at the defaults: inference takes 49 + 80 × 49 = 3969 clocks of
encoding per image. The full-size test measures **4024 clocks** from the
first feature beat to the prediction. The next image loads while the last
elements of the current one drain, so images are **3969 clocks** apart in
steady state. At 225 MHz that is 17.9 µs of compute latency and about
56,700 images/s. Single-pass training needs about 12,300 clocks per image.
The NeuralHD encoder needs 98,000 clocks per image.

## From partial hypervectors to a decision

- **Scatter** (`hdc_scatter`). Every unit needs the whole feature vector, so
  each incoming row goes to all units at once (an eager fork). Per-unit
  "taken" flags stop a unit from taking the same row twice. The input is
  acknowledged once every unit has the row. The row data is wired straight
  through, so the output data bits are copies of the input.
- **Pipes** (`hdc_pipe`). One small FIFO (depth 4) per unit. A unit can keep
  encoding while the consumer serves other units.
- **Gather** (`hdc_gather`). Merges the units' streams round-robin, one
  element per clock, and tags each element with its global dimension
  `unit*DPC + count`. A unit that has delivered all its DPC elements is not
  served again until the whole hypervector has passed, so consecutive images
  never mix. The last element carries `o_last`.
- **Classify** (`hdc_classify`). The class memory has one row per dimension,
  with all 10 class entries side by side. Each element reads its row and adds
  h_d·C_j,d into ten 64-bit scores in parallel. After the last element it
  outputs the argmax; on a tie the lowest class index wins. No division is
  needed because the host normalises the classes. Cosine similarity
  H·C/(|H||C|) then reduces to H·C/|H|, and |H| is the same for every class.
- **Bundle fit** (`hdc_bundle_fit`). Single-pass training: C_label += H,
  done as a read-modify-write on the same memory layout with saturating
  adds. `cmd_read` streams the classes out class by class for the host to
  normalise. `cmd_clear` zeroes them.

## NeuralHD: retraining and regeneration

The NeuralHD design does not chain its kernels. The host moves data between
them:

1. **Encode.** Images go into the single encoder, and the encoded
   hypervectors come back to the host (`nhd_e_*`).
2. **Fit** (`hdc_retrain_fit`). The host sends each hypervector back with its
   label. The kernel buffers the hypervector, scores it against all classes
   and predicts l' = argmax H·C_j. On a miss it makes one extra pass over the
   D dimensions, applying C_l += αH and C_l' −= αH with α = 0.037
   (2425/65536 in Q15.16). Counters `n_samples` and `n_miss` let the host see
   when the training set is classified without error.
3. **Regenerate** (`hdc_regen`). The host ranks dimensions by their variance
   across classes and sends the indices of the lowest 200. For each index the
   unit:
   - writes a new random basis vector into the encoder, 49 rows from 16
     xorshift32 generators, uniform in [-1, 1);
   - writes a new random phase, uniform over a full turn;
   - zeroes that dimension in every class.

   Each index takes 51 clocks. While the unit is busy it owns the encoder's
   basis write port.

## Number formats and where they depart from the reference

- The reference accelerators compute in 32-bit floating point. This RTL
  keeps 32-bit words but uses **Q15.16 fixed point**:
  - features, basis entries, hypervector elements and class elements are
    Q15.16;
  - dot products are accumulated exactly in 64 bits;
  - angles are 32-bit turns;
  - sine and cosine come from CORDIC, with error below 1e-5.

  The tests accept encoder outputs within 5e-4 of a floating-point model.
- Class elements saturate at ±32768. A single-pass class sums about 6000
  hypervectors with elements in [-1, 1], which is well inside that range.
- Retraining predicts with the plain dot product H·C_j. Cosine similarity
  would need the norm of each changing class, and normalising classes needs
  divisions that this design leaves to the host.
- **Choices of this design** (the reference does not give them): the MAC width of
  16 lanes, pipe depth 4, the valid/ready handshakes, the command ports and
  the memory layouts. The 16 lanes were picked to match the reported
  inference throughput (about 40–46 thousand images/s at 225 MHz). The
  single-pass training time predicted with 16 lanes (2.8 s for 60,000
  images at 263 MHz) also lands close to the reported 2.99 s.
- The basis memories are plain arrays written by the host (`*_bw_*`,
  `*_bias_*`). The initial random basis is generated off-chip.
- The host link (shared-memory transfers over the board interface) is
  replaced by valid/ready streams.

How far it has been checked: every block has its own test against values
computed in the test bench (a floating-point encoder model, reference sums
and argmax, a model of the retraining rule). The whole design runs at its
default sizes with random features, bases and classes. It has not been run
on real image data, so classification accuracy is not measured here; the
fixed-point error above is small against the spread of the class scores,
but that is an argument, not a measurement. No synthesis for an FPGA has
been done, so clock rate and resource use are unknown.

Not built: the host-side steps (class normalisation, the variance ranking,
convergence decisions, batching) and the GPU versions of the three
accelerators.

## Ports in brief

Every stream is valid/ready: a word moves on a clock edge where both are
high, and the sender holds its data until then. Commands (`cmd_clear`,
`cmd_read`, `stats_clear`) are one-clock pulses. Give them only while the
kernel's `busy` is low, between samples. Load ports (`bw_*`, `bias_*`,
`cw_*`) write one row or word per clock. Use them while the kernels are idle.
The `bw_dim`, `bias_dim` and `cw_dim` addresses are global dimension numbers;
the kernel routes each write to the unit that owns the dimension. Reset
(`rst_n`) is asynchronous and active low. Memories are not reset: load a
model, or use `cmd_clear`, before use.

## Files

- `rtl/hdc_pkg.sv`: word types, fixed-point helpers, α and the
  radians-to-turns constant.
- `rtl/hdc_cordic.sv`, `rtl/hdc_encoder_cu.sv`, `rtl/hdc_scatter.sv`,
  `rtl/hdc_pipe.sv`, `rtl/hdc_gather.sv`, `rtl/hdc_classify.sv`,
  `rtl/hdc_bundle_fit.sv`, `rtl/hdc_retrain_fit.sv`, `rtl/hdc_regen.sv`:
  the building blocks.
- `rtl/hdc_infer_kernel.sv`, `rtl/hdc_train_kernel.sv`,
  `rtl/hdc_neuralhd_kernel.sv`: the three designs.
- `rtl/hdc_fpga_top.sv`: all three side by side.
- `tb/tb_<module>.sv`: a self-checking test per block. Each prints
  `TB_RESULT checks=N failures=M`.
- `tb/tb_hdc_fpga_top.sv` and `tb/tb_hdc_fpga_top_full.sv`: end-to-end
  tests at reduced and default sizes. They share `tb/tb_hdc_fpga_top_body.svh`.
  They cover loading, inference with forced pipe back-pressure, single-pass
  training with readback, NeuralHD encode/retrain/regenerate, and counts of
  each mechanism (scatter stall, full pipe, gather contention, retraining hit
  and miss, regeneration).
- `tb/tb_hdc_infer_batch.sv`: a batch of 128 images through the default-size
  inference design, checking every prediction and the 3969-clock spacing.
- `tb/tb_hdc_train_batch.sv`: 24 labelled images through the default-size
  single-pass training design, checking every class element read back and
  the 12,299-clock spacing between bundled hypervectors.
- `tb/tb_hdc_neuralhd_round.sv`: two NeuralHD rounds at the default sizes.
  The test plays the host: encode, retrain to a clean epoch, rank the
  dimensions by variance, regenerate the lowest 200, re-encode and retrain.
  Every step is checked against a model; the test also checks the cycle
  counts (98,077 clocks per encoding, 2,003 or 4,004 per fit sample,
  51 per regenerated dimension).

## Simulating

With Verilator 5:

    verilator --binary --timing -Irtl -Itb --top-module tb_hdc_fpga_top \
        rtl/hdc_pkg.sv tb/tb_hdc_fpga_top.sv
    ./obj_dir/Vtb_hdc_fpga_top

Replace the top module and file to run any other test. The block tests
finish in well under a second. The default-size tests take a few seconds
each, most of it spent building the reference encodings.

Sizes are parameters of `hdc_fpga_top` and the kernels: `N_FEAT`, `D`,
`N_CLASS`, `LANES`, `INF_CU`, `SPT_CU` and `CORDIC_ITER`. `D` must be a
multiple of the unit counts. Feature vectors whose length is not a multiple
of `LANES` are padded with zeros by the host.
