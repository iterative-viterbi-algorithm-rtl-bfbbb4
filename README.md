# Iterative Viterbi decoding of parity-concatenated convolutional codes

Turbo-like decoding normally needs soft-output (SISO) decoders. This design
gets most of the gain of iterative decoding out of a plain hard-output
Viterbi decoder, the one every modem already has. The data is protected by two
codes in series:

- an outer, very simple **parity-check code**. This is the row code
  g(D) = D^P + 1, and optionally also an even parity over columns.
- an inner **tail-biting rate-1/2 convolutional code**.

The decoder runs the ordinary Viterbi algorithm (VA) on the inner code. It
then re-encodes the VA decisions and checks the parity code. If the block is
not valid, it adds a small "extrinsic" term to each branch metric and runs
the same VA again. The term comes from a parity partner of that bit, so bits
that the parity code says are suspect get pushed toward the right value. This
repeats until the parity code holds or an iteration limit is reached. Only
the metric memory and a small update unit are added to the VA. No soft
outputs are needed.

Two complete systems are built. Both sit side by side in `iva_top`:

| | System A (single parity) | System B (double parity) |
|---|---|---|
| row code | n_b = 192, k_b = 176, P = 16 | n_b = 255, k_b = 238, P = 17 |
| rows per block | 1 | I = 16 (15 data rows + 1 column-parity row) |
| inner code | memory 8, generators 753, 561 (octal) | memory 6, generators 744, 554 (octal) |
| extrinsic table | Table A | Table B |
| iteration limit | 10 | 20 |
| information / coded bits per block | 176 / 384 | 3570 / 8160 |
| state metrics | 7 bits | 7 bits |

## The codes

### Row parity code

`parity_encoder` is systematic. It passes the k_b information bits through
unchanged. It then appends P = n_b − k_b parity bits. Parity bit c is the XOR
of all information bits whose index is congruent to c mod P. So every code
bit belongs to one of P *classes* of G = n_b / P bits each, and each class
has even parity. For example, with P = 2 the word 1011 becomes 101101.

### Column parity and the interleaving buffer (System B)

`interleave_buffer` collects ROWS−1 rows of k_b information bits. It adds a
last row that is the even parity of each column. It then reads all ROWS rows
out, row by row, to the row encoder. The row code is linear, so the column
parity carries through the encoding. As a result, every coded bit (not just
every code bit) has even parity down its column.

### Tail-biting convolutional code

`conv_encoder` is a rate-1/2 feed-forward encoder. Before each row, its shift
register is loaded with the **last M bits of that row**. It therefore ends
the row in the state it started in. There are no tail bits, so there is no
rate loss. The cost is that the decoder does not know the start state.

**Generator notation:** the octal generators are *left-justified*. 744 with
M = 6 means the 7 taps 1111001: read the octal digits as bits and drop the
padding on the right. `iva_pkg::taps()` does this conversion.

**Bit order:** the first coded bit of each pair uses the first generator. In
the register, the newest input bit is the most significant tap.

`iva_encoder` chains the whole transmit side: interleaving buffer (System B
only), row parity encoder, a one-row buffer, then the convolutional encoder.
The one-row buffer is needed because the encoder's start state is the end of
the row.

### Why the parity holds on coded bits

A row of n_b code bits becomes NC = 2·n_b coded bits. The code is linear, and
shifting the input by P positions shifts the output by A = 2P positions. So
the coded bits i, i+A, i+2A, … also XOR to zero. The decoder relies on these
*groups* of G coded bits; it never uses the code bits directly.

## The decoder (`iva_decoder`)

### Iteration loop

1. **Load.** `bm_unit` quantizes each received sample r to 3 bits:
   s = clamp(⌊r/16⌋ + 4, 0, 7). It stores the branch metrics ω(0) = s and
   ω(1) = 7 − s. ω is a cost (a quantized −log P): the smaller, the more likely,
   and the VA looks for the path of least total cost.
2. **Viterbi.** Each row is decoded as a tail-biting code by `viterbi_tb`
   (below), using the current metrics.
3. **Re-encode and check.** The decoded row goes through a copy of the
   tail-biting encoder. This gives the hard decisions ẑ of all coded bits.
   Their group parities, and the column parities, are accumulated. The
   decoded bits are fed to `parity_checker`.
4. **Stop or update.**
   - The decoder stops if every row class and every column checks, or if
     MAX_ITER VA passes have been done. The first pass counts as 1.
   - Otherwise `bm_updater` rewrites all branch metrics, and the loop goes
     back to step 2.
5. **Output.** The information bits of the data rows are streamed out.
   `dec_ok` says whether the block was valid. `iter_count` gives the number
   of passes used.

### The metric update (`bm_updater`, `lambda_map`)

This is the heart of the method. Take coded bit i, with hard decision ẑ_i.
Let its group be the coded bits i*, i*+A, …, where i* = i mod A.

1. **Choose a partner.** Pick another member of the group, at position
   (g + d) mod G, where g is bit i's own position in the group.
2. **Compute W.** W is the XOR of the hard decisions of all the other
   members. If the parity holds, z_i ⊕ z_partner must equal W.
3. **Add the extrinsic term.** The new metric for value q is

       ω*_i(q) = ω_i(q) + λ(ω_partner(q ⊕ W))

   If bit i were q, parity would need the partner to be q ⊕ W. The partner's
   (coarsened) cost of being q ⊕ W is therefore added to the cost of q.

λ is a coarse, 2-bit mapping of the 3-bit channel metric. It keeps the
updated metrics small, so the same 7-bit state metrics suffice:

| ω | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| Table A | 0 | 0 | 0 | 0 | 0 | 1 | 1 | 1 |
| Table B | 0 | 0 | 0 | 0 | 1 | 1 | 1 | 2 |

**Double parity (System B).** A second term is added in the same way. The
column partner is the same bit position in row (j + dc) mod ROWS. Its W is
the XOR of the column without the bit and the column partner. Updated metrics
fit in 4 bits (at most 7 + 2 + 2).

**Partner offsets.**
- With `sel_random` high, the offsets d ∈ 1..G−1 and dc ∈ 1..ROWS−1 are
  drawn afresh for every coded bit from a 16-bit LFSR that steps once per
  clock. They are pseudo-random and slightly non-uniform (an 8-bit value
  reduced modulo G−1 or ROWS−1).
- With `sel_random` low, both offsets are 1.

**Channel metrics only.** The terms on the right-hand side are always the
channel metrics, never metrics that earlier passes have already modified. So
the extrinsic term does not feed on itself.

One coded bit is updated per clock. All operands are read from the decoder's
memories in the same clock.

### Tail-biting Viterbi decoder (`viterbi_tb`)

The start state is unknown, so the trellis is treated as a circle.

**Forward pass.**
- All state metrics start equal, L = 5(M+1) steps before the block start
  (mod N).
- The pass runs T = N + 2L steps: L warm-up steps, the block, and L more
  steps.
- Each clock does add-compare-select for all 2^M states. It stores one
  decision bit per state per step.
- After every step, the smallest state metric is subtracted from all of them.
  This bounds the metric spread. The 7-bit registers saturate. For these codes
  and metric ranges the spread is bounded below 128, so saturation is a
  safety net, not part of normal operation.

**Traceback.**
- Traceback starts from the best final state. It walks back one step per
  clock over all T steps.
- The decisions of the middle N steps are the output.
- A block takes 2T clocks.
- Ties go to the predecessor whose dropped bit is 0.

**Second overflow method.** With the parameter `SM_MODULO` set, nothing is
subtracted. The metrics wrap around modulo 2^SM_W. Two metrics are compared by
the sign bit of their SM_W-bit difference. This is exact as long as the true
spread stays below 2^(SM_W−1). The method saves the minimum search in every
step, but it needs about one more bit:

    SM_W ≥ log2((M+1)·2·B + 1) + 1

Here B is the largest branch metric per coded bit: 7 for channel metrics, up
to 9 or 10 once extrinsic terms are added. Both methods give identical
decisions. The test for `viterbi_tb` checks this bit for bit. The default is
rescaling with 7 bits.

### Timing

For one row of N code bits:

- **Per VA pass:** 2(N + 2L) clocks for the VA, plus about N + 6 clocks to
  re-encode.
- **Per update:** ROWS·2N + 2 clocks.

| System | Per VA pass | Per update | Limit reached |
|---|---|---|---|
| A (N = 192, L = 45) | 762 | 386 | about 11 100 (10 passes) |
| B (N = 255, L = 35, 16 rows) | 16 × 911 = 14 576 | 8 162 | about 447 000 (20 passes) |

Input loading takes one clock per sample. Output takes one clock per
information bit.

## Interfaces

All blocks use one clock and an asynchronous active-low reset `rst_n`.
Memories are not reset; they are always written before they are read.

**`iva_top`** has two independent sets of ports, prefixed `a_` and `b_`:

- **Encoder.** It takes information bits on `info_valid`/`info_ready`/
  `info_bit`. It produces coded bit pairs on `z_valid`/`z` (bit 0 is sent
  first), with `z_last` on the last pair of a block. `info_ready` drops while
  the encoder is busy with a row, and senders must wait.
- **Decoder.**
  - Input: signed 8-bit samples on `rx_valid`/`rx_ready`/`rx`, one per
    coded bit, in transmission order. A positive sample means bit 1.
  - Output: information bits on `dec_valid`/`dec_bit`/`dec_last`.
  - `done` pulses at the end of the block. `ok` and `iters` are valid from
    then on.
  - `iter_pulse` marks every extra pass.
  - `sel_random` chooses random or fixed partners.

The iteration limits are parameters `A_MAX_ITER` and `B_MAX_ITER`. The
published results for these systems also use limits 2 and 5 (A), and 5 and
10 (B).

The sub-blocks are parameterized by row length (`N_B`, `K_B`), rows (`ROWS`),
code memory and generators (`M`, `G0`, `G1`), λ table (`TABLE`), state metric
width and overflow method (`SM_W`, `SM_MODULO`), survivor length (`L`),
iteration limit (`MAX_ITER`) and input quantization (`R_W`, `Q_SHIFT`). Each file's header states its interface and
cycle timing.

## Where this design departs from the method as published

1. **Partner selection.** The method asks for a random partner per bit. Here
   it is drawn as an offset within the group from an LFSR, so the draw is
   pseudo-random and slightly non-uniform. Partner ≠ self always holds. With
   the offset fixed at 1 (`sel_random` low), the update reproduces the
   published worked example.
2. **Metrics used for partners.** The update formula as written uses updated
   partner metrics. Its worked example uses channel metrics. This design
   follows the example.
3. **One value in the worked example.** For one bit (the last one), the
   published updated metric pair does not agree with its own W value and
   update formula. This design follows the formula. That gives a difference
   of 8 instead of 6 for that bit. The other eleven values match.
4. **What was added.**
   - The quantizer: the step size and the 8-bit sample width.
   - The decoding schedule of the circular trellis.
   - The memory organisation and the handshakes.
   - The choice to test validity on the decoded code bits.

   None of these is specified by the method.
5. **Error-rate results.** The published bit- and block-error curves need
   millions of blocks per point. The testbenches check correctness, not
   those curves.

## Verification

Each block in `rtl/` has a self-checking testbench in `tb/<block>_tb.sv`.
Each one prints `TB_RESULT checks=… failures=…`. The expected values come from
independent behavioural models in `tb/iva_ref_pkg.sv`.

**Hand-worked example.** `iva_decoder_tb` runs a small code with the
following parameters:
- memory 1 (2 states), generators 6 and 4 (octal, left-justified);
- row code D² + 1, 4 → 6 bits.

For that code it checks:
- the first VA decision 100101;
- all twelve updated metric differences;
- the second pass correcting the block to 1011 in 2 iterations.

It also decodes random noisy blocks with small single- and double-parity
configurations.

**Full-size end-to-end test.** `iva_top_tb` uses the default parameters. It
sends blocks through the RTL encoder, an approximately Gaussian BPSK channel
model and the RTL decoder, for both systems. It counts these mechanisms, and
fails if any of them never happens:

- stop after one pass;
- correction by a later pass;
- stop at the iteration limit;
- random and fixed partner choice;
- encoder input stall.

**Iteration limits.** `iva_iter_limits_tb` decodes the same noisy blocks with
several decoders per system. The System A decoders use limits 2, 5 and 10.
The System B decoders use limits 5, 10 and 20. The decoders are reset before
each block, so their partner generators stay in step. A decoder with a lower
limit must then repeat exactly the first passes of a higher-limit decoder,
and the test checks this. It also prints how many blocks were valid at each
limit and the average number of passes. It uses only a handful of blocks,
so these numbers show the trend, not error-rate curves. At one noise level,
for example, System A was valid on 7, 9 and 10 of 12 blocks at limits 2, 5
and 10.

To run a testbench with plain Verilator, from the directory that contains
`rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal --top-module iva_top_tb \
        -y rtl -y tb rtl/iva_pkg.sv tb/iva_ref_pkg.sv tb/iva_top_tb.sv
    ./obj_dir/Viva_top_tb +verilator+seed+1

Replace `iva_top_tb` with any other testbench name. The end-to-end test takes
a few seconds to compile and run.
