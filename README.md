# Secure anomaly-detection accelerator for an edge FPGA

This RTL detects DDoS-style anomalies in network-monitoring data at a
network edge node. It also provides the support logic that the node needs
to be deployed securely.

- **Anomaly detection.** An attention autoencoder (Att-AE) is trained on
  normal traffic. It reconstructs each window of 12 timesteps × 8 metrics.
  A window that it reconstructs badly is flagged as an anomaly. The whole
  network runs as a streaming dataflow pipeline in 32-bit fixed point.
  There is no processor and no shared memory.
- **Majority voting for a physical unclonable function (PUF).** The PUF is
  asked the same challenge several times and each of its 256 response bits
  is decided by majority. This turns a noisy PUF into a stable device key.
- **Power waster.** A bank of randomly toggling flip-flops hides the power
  signature of cryptographic logic on the same device.

The three parts share only clock and reset. `privateer_top` places them
side by side.

```
           feat stream (12x8 words / sequence)            recon stream
  ──────► attae_accel ──────────────────────────────────────────────►
           │                                               score, anomaly
  load port (w_we, w_layer, w_addr, w_data)

  puf_start/challenge ─► puf_majority ◄─► PUF cells (outside: puf_req/ack/raw)
                          └─► puf_response (256 bit)

  waste_en ─► power_waster ─► waste_out
```

## Number format

Every activation, weight, bias, LayerNorm parameter, score and threshold
is a signed 32-bit Q8.24 number: a sign bit, 7 integer bits and 24
fractional bits. The range is [-128, 128) and the resolution is 6e-8.

- A product of two Q8.24 numbers is kept at full Q16.48 precision.
- Sums of products accumulate in 72 bits.
- A result is cut back to Q8.24 only when it leaves a block. It is shifted
  arithmetically right by 24 (rounding toward minus infinity) and then
  saturated.
- Adders that join two streams (positional encoding, residuals) also
  saturate.

The helpers `sat_q`, `qmul` and `qadd` live in `rtl/attae_pkg.sv`. The
package also holds the model sizes and the layer identifiers of the load
port.

## The streaming pipeline

A sequence enters as 96 words, timestep-major: the 8 features of timestep
0, then those of timestep 1, and so on. The reconstruction leaves in the
same order. Every stage is its own module and runs concurrently with the
others. Stages pass one word per clock over a valid/ready handshake: a word
moves on a rising edge where both `valid` and `ready` are high. FIFOs
(`stream_fifo`) and broadcasts (`stream_fork`) join the stages. A fork only
moves a word when every consumer is ready, so all branches see the same
words. Back-pressure at the output stalls the whole chain; no word is lost.

```
x ─► fork ─┬─► xfifo (192) ─────────────────────────────────────┐
           └─► Linear 8→32 ─► +posenc ─► encoder ─► LayerNorm ─► Linear 32→16
                 ─► ReLU ─► Linear 16→8 ─► scorer ◄─────────────┘
                                           ├─► recon stream
                                           └─► score, anomaly
```

The transformer encoder (`transformer_encoder`) is one layer with
post-normalisation:

```
h = LayerNorm1(x + SelfAttention(x))
y = h + LayerNorm2(Linear 64→32 (ReLU(Linear 32→64 (h))))
```

Each residual addition gets its skip operand from a FIFO:

- The first FIFO holds a whole sequence plus two vectors (448 words),
  because attention produces nothing until the last key of the sequence
  has arrived.
- The second FIFO holds two vectors (64 words). This is enough because the
  feed-forward branch never holds more than one of its input vectors.

With too small a skip FIFO the fork would block and the pipeline would
deadlock. These depths are part of the design, not tuning.

## Linear layer: a broadcast PE array

`linear_layer` computes `out[y] = bias[y] + Σx in[x]·w[y][x]` for each
timestep of F_IN inputs. By default it has one processing element (PE) per
output.

1. An accepted input is registered. In the same cycle every PE reads its
   weight `w[y][x]` from its own small memory.
2. On the next cycle the input is broadcast. All F_OUT PEs multiply it by
   their weight and add the product to their 72-bit accumulators.
   At the first input of a timestep, the accumulator starts from the bias
   instead of the old sum.
3. After the F_IN-th input, the sums are rounded to Q8.24 and copied into
   an output register bank. The bank drains one word per handshake,
   output 0 first.

With one PE per output, the layer takes one input per clock. The first
output appears two cycles after the last input. The next timestep
accumulates while the bank drains. The input stalls only when a new set of
sums is ready while the bank still holds the previous one. This happens
when F_OUT > F_IN, or under back-pressure.

Two control signals support the attention block:

- The input is taken only while `wgt_ok` is high.
- `vec_done` pulses when the last product of a timestep has been added.

`N_PE` sets the number of PEs. Its default, F_OUT, is fully unrolled.
With fewer PEs the layer works in tiles:

- The outputs are split into `T = ⌈F_OUT/N_PE⌉` tiles. Output y belongs to
  PE `y mod N_PE` in tile `⌊y/N_PE⌋`.
- Each activation is held and issued once per tile, on T consecutive
  cycles.
- The layer then takes one activation every T clocks and uses N_PE
  multipliers instead of F_OUT.
- The first output comes T + 1 cycles after the last input.
- The load addresses do not change.

Every instance in the accelerator uses the default.

## Attention from Linear layers

This is the least obvious part of the design. Self-attention needs two
matrix products between activations, S = Q·Kᵀ and A = P·V. Here both are
done by ordinary `linear_layer` instances whose *weights are written at run
time* from the data stream.

```
        ┌─► Linear Q ─► qfifo (NT·D) ───────────► Linear "score" ─► softmax ─► Linear "PV" ─► Linear O ─►
x ─► fork├─► Linear K ─► loader (K into score weights) ──┘   (weights K)           ▲ (weights Vᵀ)
        └─► Linear V ─► loader (Vᵀ into PV weights) ──────────────────────────────┘
```

- The **score layer** has D inputs and NT outputs. Its weight row `j` is
  key row `K[j][*]`, so feeding it query row `i` gives the scores
  `S[i][j] = Q[i]·K[j]`.
- The **PV layer** has NT inputs and D outputs. Its weight `w[d][j]` is
  `V[j][d]`, so feeding it the probability row `P[i][*]` gives `A[i][d]`.
- `attn_weight_loader` counts the (timestep j, feature i) position of each
  word the K or V layer emits. It writes the word to address `j·D + i`
  (keys, `TRANSPOSE=0`) or `i·NT + j` (values, `TRANSPOSE=1`).
- When all NT·D words are written, the loader raises `wgt_ok` and the
  consumer may run.
- The consumer's `vec_done` pulses are counted. After NT vectors, `wgt_ok`
  drops, and it already drops in the cycle of the last pulse. The consumer
  therefore cannot start the next sequence with the old weights. Only then
  are the next sequence's keys or values accepted.
- The weights are single-buffered. The K and V layers stall while the
  current sequence is being used.
- A query row is ready long before the last key of its sequence has been
  loaded. The query rows wait in a FIFO of NT·D = 384 words.
- One attention head is built. The 1/√D scaling of the scores is expected
  to be folded into the query weights and bias.

The score and PV layers only ever receive writes from their loaders, so
their biases keep their reset value of zero, as attention requires.

## Softmax

`softmax_unit` normalises each row of NT = 12 scores.

1. **Load.** It buffers the row and tracks its maximum `m`.
2. **Exponentials.** For each score it computes
   `e = 2^((s − m)·log₂e)`. The exponent is ≤ 0. It is split into an
   integer part `n` and a fraction `f ∈ [0,1)`. 2^f comes from a quartic
   polynomial in Horner form, with Q.24 coefficients 16777337, 11625468,
   4055203, 866838 and 229456 (absolute error below 1e-5). The result is
   shifted right by −n. Subtracting the maximum keeps every e in (0, 1], so
   the sum of 12 cannot overflow.
3. **Reciprocal.** It computes `1/Σe` with `seq_recip`, a restoring divider
   that produces one quotient bit per clock: `⌊2^48 / den⌋` in 49 cycles.
4. **Emit.** It outputs `p = e · (1/Σe)`, one word per handshake.

A row takes about 3·NT + 50 cycles. Rows are not overlapped.

## LayerNorm

`layer_norm` normalises each vector of D = 32 words and applies the
learned gamma and beta.

1. **Load.** It buffers the vector and sums it.
2. **Mean.** mean = sum / D.
3. **Variance.** A second pass over the buffer computes `Σ(x − mean)²/D`
   at Q.48 precision. The one-pass form E[x²] − mean² loses too many bits
   to cancellation when the mean is large against the spread, so it is not
   used.
4. **eps.** It adds ε = 168/2²⁴ ≈ 1e-5.
5. **Square root.** A bit-serial integer square root runs two radicand bits
   per clock for 32 cycles. The square root of a Q.48 value is directly in
   Q.24.
6. **Reciprocal.** `seq_recip` computes the reciprocal of the standard
   deviation.
7. **Emit.** `y = (x − mean)·rstd·gamma + beta`, saturated.

A vector takes about 3·D + 85 cycles. gamma resets to 1.0 and beta to 0.

## Scoring and the decision

`recon_scorer` joins the saved input copy with the reconstruction, word by
word.

- It passes the reconstruction on to the output.
- It accumulates (y − x)² at Q.48 precision.
- After 96 words it outputs the mean squared error as a Q8.24 `score`, with
  a one-cycle `score_valid` pulse.
- It raises `anomaly` when the score is strictly above the loaded
  threshold. The threshold resets to 1.0.
- Score and flag hold until the next sequence ends.

The threshold must be chosen from the score distribution of normal traffic
for the trained model.

## Loading the model

No trained model is built in. All parameters are written through one port
before use: `w_we`, `w_layer[4:0]`, `w_addr[15:0]` and `w_data`. Writes can
happen at any time. A layer uses whatever is in its memory when a word
passes through it.

| `w_layer` | block | `w_addr` |
|---|---|---|
| 0 `L_EMBED` | Linear 8→32 | Linear map (below) |
| 1 `L_POSENC` | positional encoding table | `t·32 + d` |
| 2–5 `L_Q`, `L_K`, `L_V`, `L_OPROJ` | attention Linear 32→32 | Linear map |
| 6 `L_LN1` | LayerNorm after attention | `d` gamma, `32 + d` beta |
| 7 `L_FF1` | Linear 32→64 | Linear map |
| 8 `L_FF2` | Linear 64→32 | Linear map |
| 9 `L_LN2` | LayerNorm in feed-forward branch | as `L_LN1` |
| 10 `L_LN3` | LayerNorm before the decoder | as `L_LN1` |
| 11 `L_DEC1` | Linear 32→16 | Linear map |
| 12 `L_DEC2` | Linear 16→8 | Linear map |
| 13 `L_SCORE` | anomaly threshold | 0 |

In the Linear map, address `y·F_IN + x` holds `w[y][x]` (output y,
input x). Address `F_OUT·F_IN + y` holds `bias[y]`.

Biases, beta and the positional table reset to zero. gamma resets to one.
Linear weights are not reset.

The positional encoding is a plain table, so a sinusoidal and a learned
encoding load the same way. For the sinusoidal one:

- `pe[t][2k] = sin(t / 10000^(2k/32))`
- `pe[t][2k+1] = cos(t / 10000^(2k/32))`

## Timing and size

These figures are for the default configuration (12 × 8 in, D = 32,
feed-forward width 64, decoder width 16), measured in simulation.

- **First sequence.** The decision comes 3201 clock cycles after the first
  input word.
- **Back-to-back sequences.** The pipeline overlaps them. A new decision
  comes every 2,224 cycles in steady state.
- **Throughput limit.** A LayerNorm handles one vector at a time, about
  185 cycles per timestep, or 12 × 185 per sequence. This sets the
  throughput. The softmax is next, at about 86 cycles per row.
- **Queued latency.** With the input offered continuously, latency from
  the first input word grows to about 5,050 cycles, because each sequence
  waits behind the previous one.
- **Where to speed it up.** Overlapping the LayerNorm's statistics with
  its output, or double-buffering it, is the first place to gain
  throughput.
- **Synthesis.** Generic yosys coarse synthesis of the full top gives
  about 14,600 word-level cells, 2,810 flip-flop bits and 431,500 memory
  bits. Most of the memory bits are weight memories and FIFOs.
- **Multipliers.** The Linear layers have one multiplier per output:
  32 (embedding) + 4·32 (Q, K, V, O) + 12 (score) + 32 (PV) + 64 + 32
  (feed-forward) + 16 + 8 (decoder) = 324 in all. The softmax and the three
  LayerNorms add a few more.

The clock frequency is not set by the RTL. At 60 MHz, 3201 cycles is about
0.053 ms.

## PUF majority voting

The PUF cells themselves are outside this RTL. They are race circuits in
the FPGA fabric: glitches race through addressable shift registers and
carry chains, and a flip-flop records which one arrives first. They must
be placed by hand and cannot be described portably. `puf_majority` talks
to them over a four-phase-style port:

1. `puf_req` rises with `puf_challenge`.
2. `puf_req` stays high until `puf_ack`, which comes with a 256-bit raw
   response on `puf_raw`.
3. `puf_req` is low for one cycle between rounds.

A `start` pulse (while not busy) latches the challenge and clears a 3-bit
counter (wide enough for VOTES) per response bit. The module then runs
`VOTES = 5` rounds and counts the ones at each bit position. A bit of the result is one when more
than half of the rounds had a one there. At the end, `resp_valid` pulses
and `response` holds until the next start. With a PUF answering in L
cycles, one voted response takes `5·(L + 2)` cycles.

The vote count is odd, so there are no ties. With a per-bit error rate p
per read, the voted bit is wrong with probability
Σ_{k≥3} C(5,k)·p^k·(1−p)^(5−k). For p = 0.04 that is about 6e-4.

## Power waster

`power_waster` holds 256 flip-flops driven by a 64-bit maximal-length
Galois LFSR: mask `0xD800000000000000`, that is taps 64, 63, 61 and 60.

- Cell i inverts itself when LFSR bit `i mod 64` is 1 and bit
  `(i + 1 + i div 64) mod 64` is 0.
- About a quarter of the cells switch in every cycle. In simulation the
  count was 51 to 74, mean 64. A different pseudo-random set switches each
  cycle.
- This adds current that carries no information and lowers the
  correlation an attacker can find between measured power and a cipher's
  intermediate values.
- `waste_en` low freezes the LFSR and the cells.
- `waste_out`, the parity of all cells, is only there so that synthesis
  keeps them.

How much masking is enough depends on the device and on the victim
circuit. Scale `CELLS` to the current of the logic being protected.

## What is not here

- **PUF cells.** They are reached through ports, as described above. The
  testbench uses a behavioural model with a few noisy bits.
- **Remote attestation.** This is a protocol between an attestation server
  and software on the node. A voted PUF response is the natural device
  secret for it.
- **AES engine.** It is the circuit the power waster would protect.
- **Host side.** This covers PCIe or AXI transport, the driver and the
  NWDAF data source. The feature and load ports are plain handshake
  signals.
- **Trained parameters.** No trained model is included.
- **Tiling over the inputs.** Only tiling over the outputs is provided
  (`N_PE`).

## How closely this follows the published accelerator

This RTL follows a published description of an FPGA Att-AE accelerator
and its security mechanisms. The following parts are taken from that
description:

- **Model shape.** Input of 12 timesteps × 8 features, a Linear embedding
  to 32, positional encoding, one transformer encoder layer, a LayerNorm,
  and a two-layer fully connected decoder, in that order.
- **Arithmetic.** Q8.24 throughout.
- **Dataflow.** Concurrent layer modules joined by FIFOs.
- **Linear layer.** It is a broadcast PE array with bias-initialised
  accumulators, and the PE count is a compile-time parameter.
- **Attention.** It is mapped onto Linear layers, with key and value
  outputs loaded as weights.
- **Other dedicated stages.** Positional encoding, LayerNorm and softmax
  have their own modules.
- **PUF post-processing.** Majority voting over repeated challenges gives
  a 256-bit key.
- **Power wasters.** They are used against correlation power analysis.

The description names positional encoding, LayerNorm and softmax but not
what is inside them. Their arithmetic here is this design's own. The same
holds for the linear layer's cycle timing, the weight hand-over in
attention, the scoring rule and all handshakes.

Not reproduced, and not checkable from the RTL alone:

- **Latency.** The reported latencies are 0.054 ms on a ZCU104 and
  0.076 ms on an Alveo U280. They depend on a clock frequency that is not
  stated. 3201 cycles fit in 0.054 ms from 60 MHz up.
- **Resource use.** The reported resource percentages come from vendor
  tools. With all 324 Linear multipliers unrolled, this RTL would need
  more DSP blocks than the reported 18 % of a ZCU104. Use `N_PE` to trade
  multipliers for cycles.
- **Detection quality.** ROC-AUC, precision and recall need the trained
  weights, which are not available. The fixed-point datapath has been
  checked against floating point on random weights only. The worst error
  was about 2e-3 on the reconstruction.
- **PUF and masking figures.** PUF reliability and uniformity, the 110 ms
  per response, and the key-rank result of the masking all belong to
  circuits that are not here: the PUF cells and the AES target.

## Choices made without a source value

These values are this design's choices. Each can be changed through the
parameters listed.

| Choice | Value | Parameter |
|---|---|---|
| Feed-forward width | 64 | `D_FF` in `attae_pkg`, `DFF` on `attae_accel` |
| Decoder hidden width | 16 | `D_DEC` in `attae_pkg`, `DDEC` on `attae_accel` |
| Attention heads | one | none |
| Position of the 1/√D score scaling | folded into the query weights | none |
| Anomaly score | mean squared error over the sequence, against one loaded threshold | none |
| PUF votes | 5 | `PUF_VOTES` on the top, `VOTES` on `puf_majority` |
| Challenge width | 32 | `CHAL_W` |
| Power-waster cells | 256 | `WASTE_N` on the top, `CELLS` on `power_waster` |
| LayerNorm ε | 1e-5 (168 in Q8.24) | `EPS` on `layer_norm` |
| Softmax exponential and all divisions | the circuits described above | none |

## Simulating

All files are plain SystemVerilog and need no vendor library. Read the
packages first. The testbenches use `$urandom`, a watchdog, and print one
line `TB_RESULT checks=N failures=M`.

Example: the full design at its default size, with Verilator 5.

```
verilator --binary --timing --assert -Wno-fatal \
  -y rtl -y tb +libext+.sv \
  rtl/attae_pkg.sv tb/attae_ref_pkg.sv tb/tb_privateer_top.sv \
  --top-module tb_privateer_top
./obj_dir/Vtb_privateer_top
```

Any other `tb/tb_<module>.sv` runs the same way with its own top. The
testbenches and what each one checks:

| testbench | checks |
|---|---|
| `tb_linear_layer` | an expanding, a reducing and a tiled layer (12 PEs for 32 outputs) against an exact integer model; output timing; input gaps and output back-pressure |
| `tb_stream_fifo` | a depth-12 FIFO against a queue model: order, flags, count, random traffic |
| `tb_softmax_unit` | rows against a real-valued softmax (error below 2e-5; each row sums to 1 within 1e-4) |
| `tb_layer_norm` | vectors against real-valued LayerNorm (tolerance 2e-4), reset and loaded gamma and beta, a constant vector |
| `tb_pos_encoding`, `tb_relu_stage`, `tb_residual_add` | exact results, saturation, back-pressure |
| `tb_attn_weight_loader` | addresses for both orientations, and the hand-over against a model consumer |
| `tb_self_attention`, `tb_transformer_encoder`, `tb_attae_accel` | whole sequences against the floating-point model in `tb/attae_ref_pkg.sv` |
| `tb_recon_scorer` | exact score and threshold decision |
| `tb_seq_recip` | quotients against integer division for random, extreme and zero divisors; cycle count |
| `tb_puf_majority` | the voted response against the majority of the raw responses from `tb/puf_cell_model.sv`, and the cycle count |
| `tb_power_waster` | every cell against an LFSR model, the hold when disabled, and the toggle rate |
| `tb_privateer_top` | six sequences, normal and attack, at full size. It checks reconstructions and scores (worst error about 2e-3 against floating point), anomaly flags, voted PUF keys and waster gating. It counts each mechanism along the way: stalls, weight loads, query waits, softmax rows, LayerNorm vectors, residual adds, PUF bits corrected |

All testbenches pass with Verilator 5. `tb_privateer_top` runs in under a
minute.

Every module was also broken on purpose in one place and simulated against
its testbench. Each testbench failed. The broken places were:

- a dropped bias
- an early pointer wrap
- no max tracking in the softmax
- a missing beta
- a wrong transpose
- a LayerNorm fed the wrong parameters
- wrap-around instead of saturation
- a 2-of-5 vote
- a missing LFSR tap
- an always-on waster
