# Layered sum-product decoder for ultra-long quasi-cyclic LDPC codes

This is synthesizable SystemVerilog for an LDPC decoder used in information
reconciliation for continuous-variable quantum key distribution. One party
holds a bit string X. The other holds only noisy soft information about X:
one probability pair per bit. The first party sends the syndrome
S = H·Xᵀ of X, and the decoder recovers X from the soft information and S.
The channel is very noisy, down to about −0.6 dB SNR, so the codes are very
long. The default configuration holds codes of 262,144 and 349,952 bits, with
rates 0.430 and 0.115.

The parity-check matrix H is quasi-cyclic. Each non-zero entry of a small base
matrix stands for a 64 × 64 cyclically shifted identity (a *block*). The
decoder runs the sum-product algorithm in layered order: a *layer* is one
block row, which is 64 parity checks. There are 64 node processors, one per
row of a layer. The non-zero blocks of the matrix stream through them at one
block per clock cycle. Nothing idles between blocks, between layers or
between iterations, so one iteration takes as many cycles as the matrix has
non-zero blocks (19,617 for the rate-0.430 code). After each iteration a
decision pass compares the hard decisions with S. Decoding stops on a match
or when an iteration limit is reached.

```
 p0,p1 ─► llr_ini ─► llr_mem ◄──────────────┐          syn_mem ◄─ syndrome load
                        │ LLR (column order) │            │ P bits / layer
 pcm_mem ─► ldpc_ctrl ──┤                    │            ▼
 (col, shift, last)     ▼                    │   ┌──── npu_array ─────────────────────┐
                   mes_mem ──► E_old ──────────► │ M=LLR−E ─► rotate ─► 64 × npu ─►    │
                        ▲                    │   │ rotate back ─► LLR=M+E (M delayed) │
                        └──── E_new ◄────────┴── └────────────────────────────────────┘
 decision (after each iteration): sign bits ─► NOT ─► rotate ─► XOR per layer ─► = S ?
 gen_bit  (after success): sign bits ─► NOT ─► out_bits, 64 per cycle
```

## Number format

Every soft value uses one 19-bit two's-complement word with 5 integer bits and
13 fraction bits, written (1,5,13). This covers channel LLRs, posterior LLRs
and messages. The range is ±32 with a resolution of 1/8192. Saturation is
symmetric, to ±(2¹⁸−1) LSB, so a magnitude always fits the 18-bit input of
the Ψ unit. The type, the limits and the saturating helpers live in
`ldpc_pkg`.

## How the matrix and the data are stored

The parallelism P equals the block size (64). All P values of one block
column can then be fetched in one cycle from P memory banks at a single
address.

* **`pcm_mem`** has one word per non-zero block, in processing order
  (layer by layer). Each word holds the block column, the cyclic shift (6 bits)
  and an end-of-layer flag. A plain counter reads it. Nothing else of H is
  stored.
* **`llr_mem`** holds the posterior LLRs in P banks. Variable k·P+i is in
  bank i at address k. Each bank has its own write enable, so initialisation
  can fill one bank per cycle while the node processors write all 64 at once.
* **`mes_mem`** holds one check-to-variable message per edge, P banks deep
  by the number of non-zero blocks. Block n's messages sit at address n, in
  column order. A layered decoder keeps no variable-to-check messages: they
  are recomputed as LLR − E. This is still the largest memory, about 24 Mbit
  of the 31.2 Mbit total.
* **`syn_mem`** is true dual port, with one 64-bit word per layer. Port A
  serves loading and the node processors. Port B serves the decision unit.

All memories are written as plain arrays with a registered read, so synthesis
maps them to block RAM. At the default sizes the design holds 31.58 Mbit of
memory.

## The block pipeline (`npu_array`)

Each cycle the array receives one block: 64 LLRs, the block's 64 stored
messages and its shift o. The stages are:

| stage | what happens | order of the 64 values |
|---|---|---|
| A | M = LLR − E_old (E_old forced to 0 in the first iteration) | column |
| B | rotate: row r of the block meets column (r+o) mod 64 | row |
| lanes | 64 `npu` check-node lanes, MAX_DEG + 12 cycles | row |
| C | rotate back | column |
| D | LLR_new = M + E_new, saturated | column |

M must be kept until E_new comes back. A RAM-based delay line (`delay_buf`)
holds it, together with the write-back tag (block column and block number).
The write-back happens exactly LAT = MAX_DEG + 16 cycles after the read, for
every block. A fixed delay means reads and writes never need arbitration.
In return the matrix must obey one rule: two uses of the same block column
must be at least LAT + 2 = 34 blocks apart in processing order. Otherwise the
second read would see a stale LLR. The testbench matrices are built to obey
this rule (layer j uses columns j + k·S mod NB). A real code needs its layers
ordered to meet it.

Because the first iteration ignores the stored messages, `mes_mem` never
needs clearing between frames.

## The check-node lane (`npu`)

This is the hardest part to follow. A lane receives the M values of one row,
one per cycle, and must return for each node i

  E_i = sign_i · Ψ( Σ_k Ψ(|M_k|) − Ψ(|M_i|) ),   Ψ(x) = −ln tanh(|x|/2).

No E can be produced before the whole row has been seen, yet the next row's
nodes arrive on the very next cycle. The lane therefore has two halves:

1. **Forward half.** A first Ψ unit (5 cycles) turns each |M| into Ψ(|M|).
   An accumulator adds these and XORs the hard bits (x = 1 for M ≥ 0). On
   the last node of the row, the total and the parity Q = s ⊕ (⊕ x_k) are
   pushed into a small totals FIFO.
2. **Waiting.** Each node's own Ψ value and hard bit go through a delay line
   MAX_DEG cycles long. This is long enough for the longest row to finish
   and push its total.
3. **Backward half.** When a node leaves the delay line, the total of its row
   is at the head of the FIFO. The lane subtracts the node's own term
   (clamped at zero) and runs a second Ψ unit. The FIFO is popped after the
   last node of the row.

**Sign rule.** The decision unit requires the XOR of the row's hard bits to
equal the syndrome bit s. The message to node i pushes x_i toward the value
that would satisfy the row given the other nodes: Q ⊕ x_i. So E_i is
non-negative exactly when Q ⊕ x_i = 1. This is the side-information factor
(1 − 2s) times the product of the other signs, written in terms of hard bits.

The total latency is MAX_DEG + 12 cycles, constant whatever the row length.
Rows of any length from 1 to MAX_DEG may follow each other with no gap. Two
assertions guard the lane: the accumulator must not overflow, and a row's
total must be in the FIFO before its first node needs it.

## Ψ approximation (`psi_approx`)

Ψ is approximated piecewise by y = a·u² + b·u + c. The unit has three
multipliers (u², a·u², b·u), a subtractor (c − b·u) and an adder, each
multiplier at most 25 × 18 bits. The result appears 5 cycles after the input,
one input per cycle.

**Segments.** The segment is the octave of the 18-bit input magnitude m: e is
the position of its leading one, giving 18 segments. Within a segment the
variable is u = m/2ᵉ ∈ [1,2), held as an unsigned 1.17 word. Small arguments,
where Ψ is steep, get fine segments and large arguments get coarse ones.

**Coefficients.** These are least-squares fits of Ψ over all m in each
segment, stored in `ldpc_pkg::psi_coef` as A = round(a·2²⁰),
BN = round(−b·2²⁰) and C = round(c·2¹³). The largest error against the exact
Ψ is 0.0085, about 70 LSB, and lies near the pole.

**Zero input.** Ψ(0) is infinite, so an input of 0 is evaluated as one LSB,
which gives 9.70. The alternative of saturating to 32 broke decoding. A
message of ±32 is subtracted back out of a saturated LLR in the next
iteration, and that wipes out the channel value.

## LLR initialisation (`llr_ini`)

LLR = ln(p0/p1) for one bit per cycle, from two unsigned 0.16 probabilities
(a value of 0 is read as 2⁻¹⁶). The pipeline has four stages:

1. Normalise each probability to 2ᵉ·(1+f).
2. Take log₂(1+f) from a 17-entry table, T[j] = round(2¹⁶·log₂(1+j/16)), with
   linear interpolation.
3. Subtract the two logarithms.
4. Multiply by ln 2 and round to 2⁻¹³.

The error stays below 0.002. Variable v is written to bank v mod 64 at
address v/64, using counters rather than a divider. A `p_clear` pulse
restarts the counters for a new frame. `p_valid` must be low in that cycle.

Bit convention: the decoder's hard bit is 1 where the LLR is ≥ 0. So p0
must be the likelihood of bit value 1 and p1 that of bit value 0.

## Decision and output

**`decision`** runs after each iteration has drained. It walks the matrix
again and reads the LLR sign bits of each block's column. It inverts them to
hard bits, rotates them into row order and XORs them into a 64-bit
accumulator. At each end-of-layer it compares the accumulator with that
layer's syndrome word. The pass stops at the first mismatching layer with
RETRY, or GIVE_UP when the iteration limit is reached. In an early iteration
the pass typically ends within a layer or two. A full pass, needed only when
decoding has succeeded, takes n_blocks + 3 cycles.

**`gen_bit`** streams the decoded word: one 64-bit word per cycle, block
column by block column, with its column index. The first word arrives 3
cycles after start.

**`ldpc_ctrl`** sequences everything:
IDLE → ITER → DRAIN → DECIDE → (ITER | OUTPUT | DONE). During ITER, the
matrix counter issues one block per cycle and the controller derives the
LLR, message and syndrome addresses from the matrix word. DRAIN waits on an
in-flight counter until every issued block has been written back.

## Using the top (`ldpc_decoder`)

While the decoder is idle:

1. Load the matrix through `pcm_we/pcm_waddr/pcm_wlast/pcm_wcol/pcm_woff`:
   one word per non-zero block, in layer order, with the last block of each
   layer flagged.
2. Load the syndrome through `syn_we/syn_waddr/syn_wdata`: one 64-bit word per
   layer, where bit r is the syndrome bit of row r of the layer.
3. Send `p_clear`, then one probability pair per cycle on `p_valid/p0/p1` in
   variable order. The last LLR is written 4 cycles later.
4. Set `n_blocks`, `n_cols` and `max_iter`, then pulse `start`.

`done` pulses at the end. If `success` is set, the decoded word has already
been streamed on `out_valid/out_idx/out_bits`. `iters` gives the number of
iterations run. `dec_layers_ok` gives how many layers matched in the last
decision pass, a rough progress figure.

Parameters (defaults in brackets):

| parameter | meaning |
|---|---|
| P [64] | lanes = block size |
| NB [5468] | block columns |
| MB [4840] | layers |
| WB [19617] | non-zero blocks |
| MAX_DEG [16] | blocks per layer |
| IW [8] | iteration counter width |

The defaults are large enough for both codes:

| code | bits | block columns | layers | non-zero blocks | average blocks per layer |
|---|---|---|---|---|---|
| rate 0.430 | 262,144 | 4,096 | 2,335 | 19,617 | 8.4 |
| rate 0.115 | 349,952 | 5,468 | 4,840 | 17,041 | 3.5 |

## Throughput

One iteration costs n_blocks cycles of node processing, plus LAT + 3 cycles of
drain, plus the decision pass. At 100 MHz with about 12 iterations, the
rate-0.430 code decodes at roughly 100 Mb/s. The source design's figure is
108.64 Mb/s, which counts n_blocks cycles per iteration only.

Initialisation writes one LLR per cycle, so it takes as many cycles as the
code has bits. A system that streams frames would overlap it with the
previous frame's decoding, which this design does not do.

## Where this design departs from its source

* **LLR initialisation.** The source uses vendor floating-point cores:
  conversion, division, logarithm and conversion back. Here a fixed-point
  logarithm pipeline of the same shape replaces them.
* **Ψ segments and coefficients.** The source gives neither. The 18 octave
  segments and the least-squares coefficients are this design's own. The
  source reports 16 DSP slices per node processor. This lane uses two Ψ
  units, which is 6 multipliers.
* **Decision timing.** The decision is a separate pass after each iteration,
  stopping at the first failing layer. It is not overlapped with node
  processing, and this costs the extra cycles described under Throughput.
* **Order of rotation.** LLR − E is formed in column order and then rotated
  into row order, following the prose description of the datapath. The
  block diagram could also be read as rotating only the messages.
* **Choices the source leaves open.** MAX_DEG = 16, the end-of-layer flag in
  the matrix word, the first-iteration trick, the totals FIFO, the controller
  states, the probability input format and the symmetric saturation are all
  this design's choices.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and includes a watchdog.

| testbench | what it checks |
|---|---|
| `tb_psi_approx` | random and edge-case magnitudes against exact Ψ (tolerance 0.01), the 5-cycle latency |
| `tb_npu` | 400 random rows against real-arithmetic sum-product with the syndrome sign rule, the exact latency |
| `tb_npu_array` | layers with random shifts, first-iteration flag, gaps: E_new against the reference, LLR_new bit-exact, latency and tags |
| `tb_qc_rotate`, `tb_delay_buf`, `tb_*_mem` | routing, delay, memory read/write behaviour |
| `tb_llr_ini` | ln(p0/p1) to 0.002, bank/address order, latency, clear |
| `tb_decision` | pass, retry with early stop at the right layer, give-up, against a software syndrome |
| `tb_gen_bit` | order, inversion, timing, done |
| `tb_ldpc_ctrl` | issue order, addresses, flags, drain before decision, iteration/output sequencing |
| `tb_ldpc_decoder` | end to end at P = 16: eight frames decode to the transmitted word; a frame at heavy noise gives up at the iteration limit; counts retries, passes, early-stopped decisions and give-ups, and checks gap-free issue and the decision start time |
| `tb_ldpc_decoder_full` | every parameter at its default, one frame on each of two test codes with the sizes of the target codes: 262,144 bits (4,096 columns, 2,335 layers, 19,617 blocks) and 349,952 bits (5,468 columns, 4,840 layers, 17,041 blocks), both at σ = 0.6; the first decodes exactly in 2 iterations; the second meets the syndrome in 2 to 3 iterations, with a handful of bit errors where the sparse test code has low-weight codewords |

Every testbench was also run against a copy of its unit with one deliberate
bug, and each of those runs fails. To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
          --top-module tb_npu rtl/ldpc_pkg.sv tb/tb_npu.sv -o sim
./obj_dir/sim
```

The full-size run simulates both codes in under a minute. The test codes are
generated by the bench (layer j uses block columns j + k·S); they have the
sizes of the real codes but not their optimised degree distributions, so
their noise thresholds are lower.
