# LTE turbo coder: QPP-interleaved turbo encoder and low-power Log-MAP turbo decoder

This is synthesizable SystemVerilog for the channel code of LTE. It has two halves. The encoder
is a rate-1/3 parallel concatenated convolutional ("turbo") encoder. It sends every information
bit together with two parity bits. One parity bit comes from the block in natural order, the other
from the block shuffled by a quadratic permutation polynomial (QPP) interleaver. The decoder is
iterative. Two soft-in soft-out (SISO) Log-MAP decoders take turns, and each passes what it has
learnt about every bit ("extrinsic information") to the other through the same interleaver. The
decoder uses three power-saving measures:

- it stops iterating as soon as the two decoders agree, instead of always running the maximum;
- it stops the clock of whichever SISO decoder is idle, and of registers whose value does not
  change;
- it forces the inputs of idle memories to zero.

The default configuration is small: 8-bit blocks, 24-bit code words and 3-bit soft values. The
block size and all widths are parameters. The architecture follows the turbo coder described in
"Turbo Coder for LTE Implementation in VLSI Using Verilog HDL". That description gives the block
structure, the interleaver recursion, the MAP equations and the power measures, but leaves most
numbers and every interface to the implementer. Section "Design choices" lists what was decided
here.

```
 encoder                                       decoder (one iteration = SISO 1 pass, then SISO 2 pass)

 data_in[N] ──┬──────────────► systematic ─┐    Ls,Lp1 ──► SISO 1 ──Le1──► [interleave] ──La2──┐
              ├──► RSC 1 ─────► parity 1 ──┤ data           ▲  └──► decisions (out_bits)        │
              └► QPP ► RSC 2 ─► parity 2 ──┘ assembler      La1                                  ▼
                interleaver        ──► {sys, p1, p2}        └──── [de-interleave] ◄──Le2── SISO 2 ◄── Ls(PI(k)),Lp2
```

## Files

| file | contents |
|---|---|
| `rtl/turbo_pkg.sv` | trellis of the constituent code, SISO phase type |
| `rtl/turbo_coder_top.sv` | top: encoder and decoder side by side |
| `rtl/turbo_encoder.sv`, `rsc_encoder.sv`, `data_assembler.sv` | encoder |
| `rtl/qpp_interleaver.sv` | multiplication-free QPP address generator (encoder and decoder) |
| `rtl/turbo_decoder.sv` | iteration control, buffers, interleaving, clock gating |
| `rtl/siso_decoder.sv`, `siso_control.sv` | one Log-MAP component decoder and its sequencer |
| `rtl/branch_metric_unit.sv`, `forward_metric_unit.sv`, `backward_metric_unit.sv`, `llr_unit.sv`, `max_star.sv` | Log-MAP datapath |
| `rtl/metric_ram.sv` | storage with blocked inputs (BM, FSM, BSM storage, decoder buffers) |
| `rtl/clock_gate.sv`, `dd_gated_reg.sv` | latch-based clock gate; register clocked only when its value changes |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/turbo_ref_pkg.sv` | integer reference models used by the testbenches |

## The code

**Constituent encoders.** Both RSC encoders use the 8-state LTE code: feedback polynomial
1 + D² + D³ and parity polynomial 1 + D + D³. The register is {r1, r2, r3}, with r1 the newest
bit, and the state index is 4·r1 + 2·r2 + r3. For an input bit u:

```
a = u ^ r2 ^ r3      parity = a ^ r1 ^ r3      next state = {a, r1, r2}
```

Both encoders start every block in state 0. They are not terminated, so an N-bit block gives
exactly 3N code bits, with no tail bits. The code word is packed as
`{systematic[N-1:0], parity1[N-1:0], parity2[N-1:0]}`, where bit k of each field belongs to
position k.

**QPP interleaver.** The interleaved position is PI(i) = (F1·i + F2·i²) mod N, with F1 odd and
F2 even. The generator uses no multiplier. It keeps A = PI(i) and the first difference G and
updates them each step:

```
A(0) = 0, G(0) = F1 + F2 (mod N)
A(i+1) = A(i) + G(i) (mod N),   G(i+1) = G(i) + 2·F2 (mod N)
```

Each update is one addition and one conditional subtraction of N. The defaults for N = 8 are
F1 = 3 and F2 = 2. With N = 40, F1 = 3, F2 = 10 the generator produces the LTE interleaver for the
smallest LTE block, and the testbenches check that case too.

The interleaver has three uses:

- the encoder feeds RSC 2 with data bit PI(i) at step i;
- in the decoder, SISO 2 reads position PI(k) of the systematic values and of SISO 1's extrinsic
  values (interleaving);
- SISO 2 writes its own extrinsic value k to position PI(k) (de-interleaving).

No permutation table is stored anywhere.

## How the decoder works

### Soft values and the Log-MAP arithmetic

A soft value L stands for ln(P(bit = 1) / P(bit = 0)), so a positive value favours a one. The
channel inputs are IN_W = 3 bits wide (two's complement, −4…+3). Extrinsic and a-priori values are
EXT_W = 7 bits wide, and state metrics MW = 12 bits.

The branch metric of a trellis transition with input bit u and parity bit p is

```
gamma(u,p) = u·(Ls + La) + p·Lp
```

where Ls is the systematic channel value, La the a-priori value and Lp the parity channel value.
The usual symmetric form differs from this only by a constant per trellis step, which cancels in
every LLR. So each step has only four metrics: 0, Lp, Ls+La and Ls+La+Lp.

All sums of exponentials are replaced by the Jacobian logarithm (`max_star`):

```
max*(a, b) = max(a, b) + ln(1 + e^-|a-b|)
```

The correction term is one LSB when |a−b| ≤ 2 LSB and zero otherwise. If one metric LSB stands for
0.5 in natural-log units, this is the rounded exact correction for every difference; the
`max_star` testbench checks that. Setting `LOG_MAP = 0` removes the correction and gives
max-log-MAP.

The recursions are:

```
alpha_{k+1}(s') = max* over the 2 branches s→s'   of alpha_k(s) + gamma_k
beta_k(s)       = max* over the 2 branches s→s'   of beta_{k+1}(s') + gamma_k
LLR_k           = max*_{u=1}(alpha_k + gamma_k + beta_{k+1}) − max*_{u=0}(…)
Le_k            = LLR_k − Ls_k − La_k            (saturated to EXT_W bits)
```

Each of the two LLR max* runs over eight branches. They are combined as a balanced tree that pairs
states (0,1), (2,3), (4,5) and (6,7) first. With the approximate correction, the order of that
tree affects the last bit, so the reference model uses the same order.

After every step the forward and backward metrics are normalised: the largest metric is subtracted,
so the best state is 0. Results are floored at −2^(MW−3) = −512, which also stands for
"unreachable". The start values are alpha_0 = 0 for state 0 and −512 for the other states. The
trellis is not terminated, so beta_N = 0 for every state. With 3-bit inputs and 7-bit extrinsic
values, one branch metric is at most 72 in magnitude. Every state can reach every other state in
three steps. Reachable states therefore never differ by more than about 220, well inside the floor,
and no sum overflows 12 bits.

### One SISO pass

A SISO decoder processes one trellis step per cycle, in three phases of N+1 cycles each:

1. **Forward.** The decoder requests the inputs of step k (`rd_en`, `rd_idx`). The caller supplies
   Ls, Lp and La one cycle later. The triple is written to the **BM storage**. The branch metric
   unit forms gamma and the forward unit updates alpha. Alpha_k is written to the **FSM storage**.
2. **Backward.** The steps are read back from the BM storage in reverse order. The backward unit
   updates beta, and beta_{k+1} is written to the **BSM storage**.
3. **LLR.** For k = 0…N−1, the decoder reads alpha_k, beta_{k+1} and the stored inputs, and the LLR
   unit outputs LLR_k, Le_k, the a-priori value used and the hard decision, in natural order.

The sequencer (`siso_control`) turns each request into a "process" slot one cycle later, because
every storage has a registered read. A pass takes 3·(N+1) cycles from the `start` edge to `done`.
Storing all of beta before computing any LLR costs N+1 cycles. In exchange, the LLRs come out in
natural order, and each storage has a single user per phase.

### Iterations, the stop rule and the buffers

`turbo_decoder` holds four buffers of N words:

- systematic values;
- parity pairs;
- extrinsic values from SISO 1 to SISO 2;
- extrinsic values from SISO 2 to SISO 1. This buffer is cleared while the block is loaded, so the
  first a-priori values are 0.

An iteration is one SISO 1 pass followed by one SISO 2 pass:

- SISO 1 reads Ls(k), Lp1(k) and La1(k), and writes Le1(k) and decision bit k.
- SISO 2 reads Ls(PI(k)), Lp2(k) and Le1(PI(k)), and writes Le2 to position PI(k).

During each SISO 1 pass the decoder counts the positions where the a-priori value and the new
extrinsic value have different signs. This is a sign-difference test for stopping. After a SISO 1
pass, decoding ends in either of two cases:

- from the second pass on, the count is at most `SDR_THRESH` (default 0). `out_early` is then set;
- the decoder has made `MAX_ITER` SISO 1 passes (default 8).

The decisions of that last SISO 1 pass become `out_bits`. `out_iters` gives the number of SISO 1
passes. A decode with I iterations therefore runs 2I−1 half-iterations.

### Power measures

- **Clock gating.** Each SISO decoder sits behind its own `clock_gate`, a latch that is
  transparent while the clock is low, followed by an AND gate. The gate is enabled only while the
  decoder state machine is in that SISO's half-iteration. The idle SISO, with its metric units and
  three storages, gets no clock edges at all. Everything uses an asynchronous active-low reset, so
  both SISOs reset even though their clocks are stopped.
- **Data-driven gating of the result registers.** The decoded bits, iteration count and
  early-stop flag sit in a `dd_gated_reg`. The XOR of its next and present value, ORed over the
  word, enables its clock gate. The register is therefore clocked only when its contents change,
  at most once per block.
- **Blocked memory inputs.** `metric_ram` ANDs its address and write data with the access enable.
  Bus activity from other users therefore does not reach an idle array.
- **Adaptable iteration count**, described above.

## Interfaces and timing

**Encoder** (`turbo_encoder`, and `enc_*` on the top):

- It accepts `data_in` on an edge where `in_valid` and `in_ready` are both high.
- `in_ready` then stays low while the N bits are encoded, one per cycle.
- `out_valid` pulses N+1 cycles after the accepting edge (9 cycles for N = 8).
- `data_out` holds until the next code word.

**Decoder** (`turbo_decoder`, and `dec_*` on the top):

- It accepts N triples (`in_sys`, `in_p1`, `in_p2`) with `in_valid`/`in_ready`, one per cycle.
  Gaps are allowed.
- Each half-iteration takes 3N+5 cycles: one to launch the SISO, 3(N+1) for the pass and one to
  see `done`.
- `out_valid` rises (2I−1)·(3N+5)+1 cycles after the edge that accepts the last triple. For N = 8
  that is 30 cycles for one iteration and 436 for eight.
- `in_ready` is low from the last accepted triple until `out_valid`.

The top module is `turbo_coder_top`, and it contains no channel. A system would put modulation,
demodulation, quantisation to IN_W-bit soft values and synchronisation between the two halves.
These stages are not part of this RTL.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 8 | block size in bits (code word 3N). 8 matches an 8-bit in / 24-bit out coder; LTE uses 40…6144 |
| `F1`, `F2` | 3, 2 | QPP coefficients (F1 odd, F2 even; PI must be a permutation for the chosen N) |
| `IN_W` | 3 | channel soft-value width |
| `EXT_W` | 7 | extrinsic / a-priori width |
| `MW` | 12 | state-metric width |
| `LOG_MAP` | 1 | 1: Log-MAP with correction, 0: max-log-MAP |
| `MAX_ITER` | 8 | iteration limit |
| `SDR_THRESH` | 0 | sign differences allowed for an early stop |

The encoder and decoder must use the same `N`, `F1` and `F2`. `turbo_coder_top` sets them once
for both.

## Design choices

These follow the source description:

- the block structure: two RSC encoders, a QPP interleaver and a data assembler with an 8-bit
  input and a 24-bit output;
- two SISO decoders with interleaver, de-interleaver and decisions taken from SISO 1;
- the BMU / forward / backward / LLR units, with BM, FSM and BSM storage and a timing-and-control
  sequencer;
- Log-MAP with a small correction per step;
- the multiplication-free QPP recursion;
- clock gating, including gating a register whose input equals its output, an adaptable
  iteration count with a sign-difference test, and AND-blocked memory inputs;
- 3-bit soft inputs.

These were decided here:

- the LTE polynomials, which come from the LTE standard;
- no trellis termination;
- F1 and F2 for N = 8;
- the sign convention and the 0/Lp/Lsa/Lsa+Lp branch metrics;
- the correction approximation and its scale;
- EXT_W, MW, normalisation and saturation;
- the three-phase serial schedule and the four decoder buffers;
- the stop threshold and MAX_ITER;
- all handshakes, the code-word bit order and the asynchronous reset.

The source also shows a clock-enable input and output on the decoder, and mentions a parallel
(multi-lane) interleaver address generator. Neither is included. The decoder here is serial, at
one trellis step per cycle. Clock gating is done per SISO decoder, and data-driven gating is used
only on the result registers. A receiver front end
(demodulator, A/D converter, synchronisation) is outside the design.

## Verification

Each module has a self-checking testbench. It ends with
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. The decoder-side testbenches compare
results bit for bit with `tb/turbo_ref_pkg.sv`. That package is an independent integer model. It
evaluates the QPP formula with multiplications, runs a tap-based encoder and computes a
whole-block Log-MAP decoder on arrays.

- `tb_turbo_coder_top` runs the top at its default parameters. It sends 2000 random blocks: the
  encoder output is checked, then the block passes through a model channel (±2 plus uniform noise
  of varying spread, clamped to 3 bits). The decoder output, iteration count, early-stop flag and
  exact latencies are checked, and noiseless blocks must come back unchanged. The test also
  requires that each mechanism occurred: early stops, stops at the limit, corrected channel
  errors, gated clock edges on both SISOs, at most one result-register clock edge per block,
  blocked memory inputs and max* corrections.
- `tb_turbo_decoder` runs the decoder at the LTE block size K = 40 (F1 = 3, F2 = 10), with gaps in
  the input stream.
- The unit testbenches cover the rest: exhaustive branch metrics and max*, random ACS steps in
  both max* modes, LLR saturation, the memory with blocked writes, the sequencer schedule, the
  clock gate's behaviour in the high phase of the clock, and the interleaver at N = 8 and N = 40.

To simulate one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/turbo_pkg.sv tb/turbo_ref_pkg.sv \
    tb/tb_turbo_coder_top.sv --top-module tb_turbo_coder_top -o sim
./obj_dir/sim
```

All testbenches use two-state-safe stimulus: everything that is read is reset or written first.
Each one finishes in well under a second.

## Limits

- Because the trellis is not terminated, the last bits of a block are protected less well than in
  LTE, which appends tail bits. The defaults suit short blocks like the 8-bit one.
- Block sizes up to a few hundred bits simulate quickly. Large LTE blocks (up to 6144) are legal
  parameter values, but they need N-word FSM and BSM storage of 96-bit words per SISO. They have
  not been simulated.
- The clock gate is a behavioural latch plus AND gate. In an ASIC flow it should be mapped to the
  library's integrated clock-gating cell.
