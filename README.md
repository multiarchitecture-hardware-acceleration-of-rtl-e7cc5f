# Hyperdimensional-computing classifier on an FPGA: inference, single-pass training and NeuralHD retraining

Hyperdimensional computing (HDC) classifies an input by mapping its feature
vector into a very long vector, a *hypervector*, and comparing that
hypervector with one stored hypervector per class. Training works the same
way: it adds encoded inputs into their class vectors. There is no
back-propagation. Nearly all of the work is in the encoding step, and every
dimension of the hypervector can be encoded independently. That makes HDC a
natural fit for a dataflow FPGA design that spreads the dimensions over many
parallel encoder units.

This repository holds synthesizable SystemVerilog for three such FPGA
designs, sized for MNIST handwritten digits (784 pixel features,
10 classes) and a 2000-dimension model:

| design | module | encoder units | purpose |
|---|---|---|---|
| inference | `hdc_infer_top` | 25 | classify streamed images |
| single-pass training | `hdc_train_top` | 8 | bundle each training image into the class of its label |
| NeuralHD training | `hdc_nhd_top` | 1 (all 2000 dimensions) | retraining with learning rate α, plus regeneration of weak dimensions |

On a real board each design would be its own bitstream. `hdc_fpga_top`
places all three side by side. Their ports carry the prefixes `inf_`, `trn_`
and `nhd_`, and they share only the clock and reset.

## The encoding

Each dimension *i* has a random basis vector **B**ᵢ (784 values) and a
random phase bᵢ drawn uniformly from [0, 2π). An input **F** becomes

    hᵢ = cos(Bᵢ·F + bᵢ) · sin(Bᵢ·F)        i = 1 … 2000

This is an RBF-like kernel encoding. The same encoder unit, `hdc_enc_cu`,
serves all three designs. Only its slice size changes: 80 dimensions for
inference, 250 for training, and 2000 for NeuralHD.

Inside one unit:

1. **Load.** The feature vector streams into a local buffer, one feature per
   clock (784 cycles).
2. **Dot products.** A single multiply-accumulator walks the basis memory of
   the slice one product per clock. Each Bᵢ·F therefore takes 784 cycles, and
   the slice takes `D_SLICE × 784` cycles, with an initiation interval of 1
   throughout.
3. **Angle.** Each finished dot product, a Q32.32 accumulator value, is
   multiplied by 1/2π and kept modulo 1. The result is an angle in *turns*: a
   32-bit unsigned fraction of a full circle. The phase bᵢ is stored in the
   same format, so `Bᵢ·F + bᵢ` is a plain 32-bit addition whose overflow is
   exactly the reduction modulo 2π.
4. **Sine and cosine.** Two pipelined CORDIC units (`hdc_cordic`, 24
   micro-rotations each) take one angle per clock. The top two bits of the
   angle pick the quadrant. The other 30 bits are rotated, and the quadrant is
   folded back in afterwards. Results are Q16.16, accurate to a few LSB.
5. **Output.** The product hᵢ enters a four-entry result FIFO, tagged with its
   global dimension number. A credit counter limits how many dimensions are in
   flight. When the downstream pipe is full, the unit stalls its
   multiply-accumulator instead of dropping results.

The next feature vector can be loaded as soon as the last dimension of the
previous one has started its sine and cosine.

## Inference dataflow (`hdc_infer_top`)

    features ─► scatter ─┬─► CU 0  (dims    0..  79) ─► pipe ─┐
                         ├─► CU 1  (dims   80.. 159) ─► pipe ─┤
                         │   …                                ├─► gather ─► classify ─► prediction
                         └─► CU 24 (dims 1920..1999) ─► pipe ─┘

- **`hdc_scatter`** broadcasts every feature word to all 25 units. Every unit
  needs the whole image, since it encodes different dimensions of the same
  input. Each output takes its copy on its own handshake. The next word is
  accepted only when all 25 outputs hold theirs, so a single slow unit holds
  back the stream.
- **`hdc_pipe`** is a plain valid/ready FIFO, 16 words deep. It decouples each
  unit from the classifier.
- **`hdc_gather`** merges the 25 pipes round-robin. Each element carries its
  dimension, so arrival order does not matter. A per-input counter stops a
  unit that runs ahead from mixing elements of the next image into the
  current one. The 2000th element is flagged `last`.
- **`hdc_classify`** does not rebuild the hypervector. As each element hᵢ
  arrives, it reads column *i* of the ten class vectors and adds hᵢ·Cⱼ[i] into
  ten Q32.32 accumulators in parallel. Three cycles after the last element,
  `hdc_argmax` picks the largest sum. The lowest class index wins a tie. The
  prediction is held until it is taken.

**Similarity.** The classifier uses the dot product, not the cosine. Training
hands the classes to the host, which normalises them to unit length. Once
the classes have unit length, the cosine similarity differs from the dot
product only by ‖H‖, which is the same for every class. The argmax is
therefore unchanged.

**Timing at the default size.** The latency of one image is
784 + 80·784 = 63,504 cycles, plus a few dozen cycles of pipeline. At
225 MHz that is about 0.28 ms. The full-size simulation measures 62,777
cycles from the last feature word to the prediction. Images can follow
back to back.

Before inference, the host writes these memories through write ports that
address a global dimension:

- the basis (2000 × 784 words);
- the phases (2000);
- the classes (10 × 2000).

Each unit keeps only the writes that fall inside its own slice.

## Single-pass training (`hdc_train_top`)

The structure is the same as for inference, with 8 units of 250 dimensions
each. The classifier is replaced by **`hdc_fit_sp`**:

- A label stream supplies one label per image. The label is taken when the
  image's first element arrives and released after its last element.
- Every element does a read-modify-write of `C[label][dim] += h` in a single
  `N_CLASSES × D` memory, pipelined to one element per clock.
- `cmd_clear` zeroes the memory.
- `cmd_read` streams all 20,000 class words out, one word every two cycles, so
  that the host can normalise them.

Each image takes 250 × 784 = 196,000 cycles.

## NeuralHD retraining (`hdc_nhd_top`)

Plain bundling gives a quick but rough model. NeuralHD improves it in two
ways:

- **Retraining.** It repeatedly corrects mistakes.
- **Regeneration.** It replaces dimensions that do not help to tell the
  classes apart.

The on-chip memory has room for only one encoder unit, so this design
encodes each training image once. It writes the image's hypervector to
external memory at word address `s·2000` and keeps the label on chip. The
host drives the rounds:

1. `cmd_clear`, then `cmd_encode` while it streams the training set and the
   labels. Each image takes 784 + 2000·784 cycles.
2. `cmd_fit` with `n_samples` and `n_iters`. For every stored hypervector,
   **`hdc_nhd_fit`**:
   - reads the hypervector back from external memory into a 2000-word
     buffer, scoring all ten classes while the words arrive;
   - picks the best class l′;
   - if l′ differs from the true label l, walks the buffer once more and
     applies `C_l += α·H` and `C_l′ −= α·H`, with α = 0.037 (Q16.16 2425).

   A pass without a single update sets `converged` and ends the loop early.
   Otherwise the loop ends after `n_iters` passes.
3. `cmd_read` streams the classes out. The host computes the variance of each
   dimension across the ten classes and sends the 200 dimensions with the
   lowest variance to the drop port.
4. **`hdc_regen`** handles each dropped dimension. It writes 784 fresh basis
   values into the encoder, then a fresh phase, and zeroes that dimension in
   every class. This takes 785 cycles per dimension, and `regen_done` pulses
   after 200 dimensions. The random numbers come from a 32-bit xorshift
   generator. A basis value is the low 17 bits of the generator state read as
   a Q16.16 number, so it is uniform in [−1, 1). Regeneration writes take
   priority over host basis writes.
5. The host re-encodes the training set, which starts the next round.

External memory is not part of this design. Its write channel
(valid/ready, address, data) and read channel (request valid/ready with an
address, then in-order responses) are top-level ports. `tb/hdc_gmem_model.sv`
is a behavioural model of it, with a programmable latency and random stalls.

## Number format and other departures

- **Fixed point, not floating point.** The reference design computes in
  32-bit floating point. Here every value is signed Q16.16, products and sums
  are kept as Q32.32 in 64 bits, and angles are 32-bit turn fractions. The
  encoded values lie in [−1, 1], so Q16.16 loses little accuracy. The
  testbenches compare against real-number models with tolerances of 10⁻³ or
  tighter. Class sums in single-pass training wrap at ±32768 rather than
  saturate.
- **Sine and cosine by CORDIC.** The reference design only says that a
  cosine/sine function is applied.
- **Host duties stay with the host.** These are class normalisation, the
  variance calculation, picking the dimensions to drop, and the outer loop of
  NeuralHD rounds.
- **Handshakes, commands and memory ports** are choices of this design.
  Every stream uses valid/ready. A word moves on a rising edge where both are
  high. Reset is synchronous and active-low, and it clears control state but
  not memories.
- **Similarity during retraining** is the un-normalised dot product, because
  the classes are only normalised between rounds, on the host.
- **Pipes** are 16 words deep (parameter `PIPE_DEPTH`).

## Parameters

`hdc_pkg` holds the shared types (`data_t`, `acc_t`, `turn_t`, `hv_elem_t`,
`basis_wr_t`), the default sizes (`D_DEF = 2000`, `N_FEAT_DEF = 784`,
`N_CLASSES_DEF = 10`) and the constants 1/2π (Q0.32) and α (Q16.16).

The designs take these parameters:

- `D`, `N_FEAT` and `N_CLASSES`.
- `N_CU`: `D` must be a multiple of `N_CU`.
- `PIPE_DEPTH`.
- `ITER`: the number of CORDIC stages.
- For NeuralHD only: `MAX_SAMPLES` (the size of the label memory, default
  60000) and `N_DROP` (default 200).

The basis memories are the large item. At the defaults, each design holds
the full 2000 × 784 basis: 6.3 MB in Q16.16.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares
against an independent model (real arithmetic from `hdc_tb_pkg`, or
reference queues) and ends with a `TB_RESULT checks=… failures=…` line. The
testbenches of the three designs and of `hdc_fpga_top` run at reduced sizes
(for example D = 12, 8 features, 3 classes). They count how often each
mechanism fires and fail if one never does:

- predictions and prediction stalls;
- full pipes and stalled encoder units;
- bundled images and waits for a label;
- external-memory stalls, class updates, iteration-limit exits and convergence
  exits;
- regenerations and class read-outs.

`tb_hdc_fpga_full` runs `hdc_fpga_top` at its default parameters. It loads
the complete basis into all three designs and sends one random image
through every design at once. It then checks:

- the inference prediction and its latency;
- the single-pass class memory;
- the hypervector stored in external memory;
- one NeuralHD retraining iteration, word for word.

This takes about 1.5 minutes of simulation. Batches of images, and many
training images or retraining rounds, were simulated only at the reduced
sizes above.

Not verified: timing closure at the clock rates of the reference design
(225, 263 and 198 MHz), and accuracy on the real MNIST data, which the
testbenches do not contain.

## Simulating

With Verilator 5, from the repository root:

    verilator --binary --timing --assert -Wno-fatal -j 4 \
      --top-module tb_hdc_infer_top -y rtl -y tb +libext+.sv \
      rtl/hdc_pkg.sv tb/hdc_tb_pkg.sv tb/tb_hdc_infer_top.sv
    ./obj_dir/Vtb_hdc_infer_top

Replace the top-module name and the last file with any other testbench in
`tb/`.
