# Syndrome-based neural decoder for BCH(63,45)

This is synthesizable SystemVerilog for a soft-decision decoder of the BCH(63,45) code. A
neural network estimates which received bits are wrong, and the decoder then flips them.
The network looks only at two things: the syndrome of the hard decisions and the magnitudes
of the channel values. So it learns the noise, not the codewords, and the same hardware
decodes any code once it has weights trained for that code.

The network has seven fully connected layers (81 → 300 → 300 → 300 → 300 → 300 → 300 → 63,
495,063 parameters). It is compressed before it reaches the hardware:

* **Pruning.** 90% of the weights in every layer are removed. The removal is even: each
  processing element (PE) keeps exactly 10% of its share.
* **Clustering.** Each surviving weight is replaced by one of 64 per-layer centroids. A
  weight is therefore stored as a 6-bit index.
* **Quantization.** Centroids are 8-bit FXP-1.7, activations are 8 bits, and accumulation
  is in 32-bit FXP-10.22. FXP-a.b means a integer bits (sign included where signed) and b
  fraction bits.

The hardware is built to exploit both kinds of zeros. It skips pruned weights by storing the
matrices in compressed sparse column (CSC) form. It also skips zero activations, which RELU
produces for about half of the inputs to each layer, by working through the matrix one
column (one input) at a time.

## Decoding flow

```
 reliabilities ─► input FIFO ─► pre-processing ─► [pp0] ─► layer 1 ─► [pp1] ─► ... ─► layer 7 ─► [pp7] ─► post-processing ─► output FIFO ─► decoded word
  (8 bit/beat)                      │  81 × 8 bit        RELU            300 × 8 bit    hard tanh   63 × 8 bit      ▲
                                    └──────────────── hard-decision FIFO (63 bit) ─────────────────────────────────┘
```

1. **Pre-processing** (`sdld_preproc`, `bch_syndrome`). 63 reliabilities y are packed into a
   word. Each is a signed FXP-3.5 value: −4.0 … +3.97, with positive meaning bit 0. The
   stage forms the hard decision y_b (1 where y < 0), the magnitudes |y| and the 18-bit
   syndrome s = H·y_b. The network input is v = [s, |y|]: 18 + 63 = 81 unsigned 8-bit
   FXP-3.5 values, where a syndrome bit of 1 enters as 1.0. y_b is parked in the
   hard-decision FIFO.
2. **Noise estimation.** Seven sparsely connected layers, described below. The six hidden
   layers use RELU. The last layer uses hard tanh and produces z, 63 signed FXP-1.7 values.
3. **Post-processing** (`sdld_postproc`). Each bit whose z is negative is flipped:
   x̂ = y_b XOR (z < 0). z = 0 leaves the bit alone.

H is the parity-check matrix whose column i is x^i mod g(x). The generator is
g(x) = x^18+x^17+x^16+x^15+x^13+x^11+x^10+x^7+x^6+x^3+x+1 (`0x782CF`), the product of the
minimal polynomials of α, α³ and α⁵ in GF(64) built on x⁶+x+1. With this H, s is the
remainder of y_b(x) divided by g(x). A network must be trained with the same H.

## The sparsely connected layer

This is the heart of the design (`sc_layer` = `sc_fetch_ctrl` + P × `sc_pe` + P × `sc_act_quant`).
It computes

    φ_i = g( b_i + Σ_{j : w_ij ≠ 0, u_j ≠ 0}  C[I_ij] · u_j )

Here C is the layer's 64-entry centroid table, I_ij the cluster index of weight (i, j),
and g is RELU or hard tanh.

**Work split.** Output row i belongs to PE i mod P, so PE p owns the local rows
r = 0 … ROWS−1 with i = r·P + p, where ROWS = ⌈N_OUT/P⌉. Each PE has private memories:

| memory    | entries      | content                                                        |
|-----------|--------------|----------------------------------------------------------------|
| `col_ptr` | N_IN + 1     | CSC column pointers: column j's entries are col_ptr[j] … col_ptr[j+1]−1 |
| `nz_mem`  | NNZ_MAX      | {local row r, 6-bit cluster index} per stored weight           |
| `lut`     | 64 × 8 bit   | centroids, FXP-1.7 (every PE of a layer holds the same copy)   |
| `bias`    | ROWS × 32 bit| b_i in FXP-10.22                                               |
| `acc`     | ROWS × 32 bit| partial sums in FXP-10.22 (the PE's slice of the accumulator buffer) |

NNZ_MAX defaults to ⌈ROWS·N_IN·10%⌉, enough because pruning is balanced across PEs.
At P = 16 this is 154 entries for layer 1, 570 for layers 2–6 and 120 for layer 7.

**Column-wise schedule.** The fetch/control unit scans the input vector one element per
cycle. A zero is skipped at once. A non-zero u_j is broadcast as (j, u_j) into the input
FIFO of every PE, and the scan stalls if any FIFO is full. Each PE pops a column, reads its
two pointers, and performs one multiply-accumulate per cycle for each stored weight:

    acc[r] += (u_j × C[idx]) << (15 − in_frac)

The product of an unsigned 8-bit input with in_frac fraction bits and an FXP-1.7 centroid
has in_frac+7 fraction bits. The shift aligns it to the 22 fraction bits of the
accumulator, which wraps at 32 bits. The next column is popped in the same cycle as the
last MAC of the current one. A column with n stored weights therefore costs n cycles, or 1
cycle if it has none.

**Activation.** When the scan is done, every PE's FIFO is empty and the output ping-pong
buffer has a free half, the unit walks the local rows. In each cycle, all P PEs present
acc[r] + bias[r]. P activation units shift the sum right by 22 − out_frac (truncating) and
clip it: to 0…255 for RELU, or to −128…127 (FXP-1.7, i.e. hard tanh) for the last layer.
The result goes to lane p, row r of the next buffer, and the accumulator is cleared for the
next vector. The last row commits the buffer half.

**Layer time.** For one vector:

    about max(N_IN, busiest PE's MAC cycles + its idle gaps) + ROWS + 3 cycles

With 16 PEs and about 50% zero inputs this is roughly 300–400 cycles for a 300-input layer.

Each layer's output format (out_frac) is a configuration register, because the right
format depends on the trained network's dynamic range. The next layer's in_frac is wired
from it. Layer 1's input is fixed at FXP-3.5 and layer 7's output at FXP-1.7.

## Pipeline and buffering

All stages run at once. Consecutive stages are joined by ping-pong buffers (`pingpong_buf`):
two halves, each stored as P banks, with element e at bank e mod P, row e / P. This matches
the row ownership above, so a layer writes all P lanes in one cycle and the next layer
reads one element per cycle by index. A producer commits a half and the consumer releases
it. Each of the eight ping-pong buffers holds up to two vectors, so at most 16 words sit
between pre-processing and the output. The hard-decision FIFO (default 32 words) is deep
enough to hold y_b for all of them. Back-pressure from the output propagates stage by stage to the input FIFO.

The word rate is set by the slowest stage, which is normally a 300-input layer. Latency is
the sum of the stage times.

## Loading a network

The weights come out of training, so they are not part of the RTL. They are loaded through
the configuration port of `sdld_top` before decoding starts, one 32-bit word per cycle with
`cfg_we` high:

| `cfg_sel`    | `cfg_layer` | `cfg_pe` | `cfg_addr`      | `cfg_data`                                   |
|--------------|-------------|----------|-----------------|----------------------------------------------|
| `CFG_COLPTR` | 0–6         | PE       | column j (0…N_IN)| CSC pointer of column j within that PE       |
| `CFG_NZ`     | 0–6         | PE       | entry k         | [15:8] local row r = i div P, [5:0] cluster  |
| `CFG_LUT`    | 0–6         | ignored  | cluster 0…63    | [7:0] centroid, FXP-1.7 (all PEs)            |
| `CFG_BIAS`   | 0–6         | PE       | local row r     | bias of row r·P + p, FXP-10.22               |
| `CFG_FRAC`   | 0–5         | ignored  | –               | [3:0] fraction bits of the layer's output    |

Building PE p's image: walk the columns j = 0 … N_IN−1. Set col_ptr[j] to the number of
entries written so far, then append {i div P, I_ij} for every kept weight (i, j) with
i mod P = p. After the last column, set col_ptr[N_IN] to the total. Layers are numbered
from 0, so layer 0 is the 81-input layer. Writes while codewords are in flight are not
supported.

## Top-level interface (`sdld_top`)

| port                          | meaning                                                          |
|-------------------------------|------------------------------------------------------------------|
| `clk`, `rst_n`                | clock; asynchronous active-low reset                             |
| `s_valid`, `s_data[7:0]`, `s_ready` | one reliability per beat, code position 0 first, 63 beats per word |
| `m_valid`, `m_data[62:0]`, `m_ready` | one decoded codeword per beat, bit i = code position i    |
| `cfg_*`                       | network loading, see above                                       |

Parameters: `P` (PEs per layer, default 16), `IN_FIFO_DEPTH` (128), `HD_FIFO_DEPTH` (32),
`OUT_FIFO_DEPTH` (8), `PE_FIFO_DEPTH` (16). Other P values work unchanged; 4 and 8 are
tested.

## Measured behaviour

Cycle counts from simulation, with random networks of the specified size and sparsity and
noisy codewords at about Eb/N0 = 4 dB. The right-hand columns are the published
measurements of an FPGA prototype of this architecture at 200 MHz, converted to cycles:

| PEs/layer | latency (cycles) | cycles per word | prototype latency | prototype cycles per word (63 bits) |
|-----------|------------------|-----------------|-------------------|-------------------------------------|
| 16        | 2,324            | 388             | 83 µs = 16,600    | 5.0 Mbit/s → 2,520                  |
| 8         | 3,665            | 735             | 111 µs = 22,200   | 3.7 Mbit/s → 3,405                  |
| 4         | 7,164            | 1,705           | 154 µs = 30,800   | 2.7 Mbit/s → 4,666                  |

This RTL needs far fewer cycles than the prototype because each PE retires one MAC per
cycle and the scan moves one column per cycle. The numbers depend on where the weights fall
and on how many activations are zero. Timing closure at 200 MHz has not been studied. Each
PE's MAC path (weight memory → centroid table → 8×9 multiplier → 32-bit adder) is a single
cycle and may need a pipeline register on a real FPGA.

## Choices made in this RTL

The architecture, the sizes, the number formats, zero skipping, CSC storage with cluster
indices, cyclic row assignment and the ping-pong/FIFO dataflow all follow the published
design. The following points were not specified there and were decided here:

* **Stream format.** Valid/ready streams of one 8-bit reliability in and one 63-bit word
  out. Reliabilities are signed FXP-3.5, and y = 0 counts as bit 0.
* **Unsigned activations.** All network inputs are unsigned 8-bit. |y|, the syndrome and
  RELU outputs are never negative, so |−4.0| = 128 is exact and RELU outputs reach 255.
* **Parity-check matrix.** H is the cyclic form given above. The network and its training
  must use the same H.
* **Bias and rounding.** Biases are stored per row in accumulator format and added at
  read-out. Quantization truncates. The accumulator wraps at 32 bits with no saturation.
* **Reset formats.** out_frac of the hidden layers resets to 5.
* **Scheduling.** One input element is examined per cycle, and there is no double buffering
  of the accumulators. A layer's next vector starts scanning after its ROWS activation
  cycles.
* **FIFO depths.** As listed under the parameters.

Not included: the DMA engine, the processor and the DRAM used to test the prototype, and any
trained weights. The decoder's streams and configuration port are where such a system
connects.

## Files

`rtl/`

| file | content |
|------|---------|
| `sdld_pkg.sv` | sizes, formats, g(x), configuration enum, H column function |
| `sdld_top.sv` | complete decoder |
| `sdld_preproc.sv`, `bch_syndrome.sv` | packing, hard decisions, magnitudes, syndrome |
| `sc_layer.sv` | one sparsely connected layer |
| `sc_fetch_ctrl.sv` | column scan, zero skipping, PE feeding, activation sequencing |
| `sc_pe.sv` | processing element with CSC memories, centroid table, accumulators |
| `sc_act_quant.sv` | RELU / hard tanh and 8-bit quantization |
| `sdld_postproc.sv` | bit flipping |
| `pingpong_buf.sv`, `sync_fifo.sv` | inter-stage buffers |

`tb/` holds one self-checking testbench per module (`tb_<module>.sv`). Each prints
`TB_RESULT checks=N failures=M`. There are also:

* `tb_sdld_top.sv`: full-size end to end. It loads a random 495,063-parameter network,
  decodes 24 noisy codewords bit-exactly against an integer reference, checks latency and
  word rate against the table above, and requires every mechanism to occur: zero skipping,
  PE FIFO stalls, a layer waiting for a free output buffer, saturation, bit flips, and
  input and output back-pressure.
* `tb_sdld_pe_sweep.sv`: the same test with 4 and 8 PEs per layer.
* `sdld_ref_pkg.sv`: the reference model, layer arithmetic and polynomial division.
* `sc_layer_harness.sv`, `sdld_sweep_harness.sv`: shared test drivers.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/sdld_pkg.sv tb/sdld_ref_pkg.sv tb/tb_sdld_top.sv --top-module tb_sdld_top
obj_dir/Vtb_sdld_top
```

Replace `tb_sdld_top` with any other testbench name. The full-size test builds in about ten
seconds and runs in a few seconds; most of its roughly 100,000 cycles are spent loading the network.
The testbenches use `$urandom` only, with no constraint solver, and behave the same on a
two-state simulator.
