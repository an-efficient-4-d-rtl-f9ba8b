# 4-D 8PSK trellis-coded-modulation decoder with a two-step-comparison TMU and a hybrid T-algorithm Viterbi decoder

This is synthesizable SystemVerilog for a receiver-side decoder for four-dimensional 8PSK
trellis-coded modulation (TCM). Every clock it takes one 4-D symbol, which is four
consecutive 8PSK samples Z0..Z3 with 7-bit I and Q each. Every clock it also returns
one word of decoded bits. A 2-bit mode input selects one of four code rates:
Rm = 8/9, 9/10, 10/11 or 11/12. In Rm = 11/12 each symbol carries 11 information bits.

The design follows the architecture published as "An Efficient 4-D 8PSK TCM Decoder
Architecture". It has two ideas, and most of this text explains them:

1. **A cheap transition metric unit (TMU).** A 4-D TCM decoder must first reduce 4096
   candidate point combinations to 16 branch metrics per symbol. The two-step
   comparison does this with 144 additions and 96 comparisons. The auxiliary-trellis
   method it replaces needs 336 additions and 240 comparisons.
2. **A hybrid T-algorithm in the Viterbi decoder.** Weak branch metrics (BMs) are
   purged as well as weak states. An addition in the add-compare-select unit (ACSU)
   happens only when both its BM and its predecessor state survived. The search for
   the best path metric (PM), which a plain T-algorithm needs inside the ACS loop, is
   replaced by an estimate computed from the best BM. So the loop gets no longer.

## Signal flow

```
 in_sym ──► tmu ──► bm_purge ──► acsu ◄──► pm_estimator
 (Z0..Z3)   │ 16 BMs   keep[16]   │ dec, upd, alive (64 states)
            │ 16 paths            ▼
            └──(2 regs)──► path_delay ◄── sel ── smu_re
                                │ 12-bit path
                                ▼
                             demapper ──► diff_decoder ──► out_bits
```

| module | role |
|---|---|
| `tcm_pkg` | word lengths, types, trellis functions, rate-mode masks |
| `euclid_metric` | four folded Euclidean metrics of one 8PSK sample |
| `tmu` | 16 BMs, the winning 12-bit path of each BM, and the maximum BM (3 pipeline stages) |
| `bm_purge` | T-algorithm on BMs (1 stage) |
| `acsu` | 64-state, 8-branch ACS with the hybrid T-algorithm and the PM registers |
| `pm_estimator` | SPEC-T estimate of the optimal PM, plus the pipelined correction search |
| `smu_re` | register-exchange survivor memory of 4-bit branch indices |
| `path_delay` | holds the 16 paths of each stage until the survivor memory selects one |
| `demapper` | turns the four point labels back into bits x11..x0 |
| `diff_decoder` | mod-8 differential decoding of x11, x8, x4 |
| `tcm_decoder` | top level |

## The 4-D constellation and what a "path" is

The transmitter maps 12 bits x11..x0 onto four 8PSK point labels (0..7, phase =
label x 45°). All arithmetic is mod 8:

```
a  = 4*x11 + 2*x8 + x4
Z0 = a
Z1 = a + 4*x10 + 2*x6 + x2
Z2 = a + 4*x9  + 2*x5 + x1
Z3 = a + 4*(x10+x9+x7) + 2*(x6+x5+x3) + (x2+x1+x0)
```

- x3 x2 x1 enter a rate-3/4 systematic feedback convolutional encoder with 64 states.
  The encoder adds the parity bit x0.
- The other eight bits are uncoded. They select one of 256 parallel transitions
  between the same two trellis states.
- A rotation of the received symbol by k x 45° adds k to `a` only. For that reason
  x11, x8 and x4 are differentially encoded mod 8 at the transmitter, and
  `diff_decoder` undoes this.

Inside the Viterbi decoder a branch is named only by its 4-bit index x3x2x1x0. There
are 16 such indices, and each has its own BM. The "path" of a branch is the 12-bit
group of four point labels that won that BM. The paths wait in `path_delay` while the
survivor memory decides. The decoded index then picks one path, and `demapper`
inverts the mapping above.

## Transition metric unit: the two-step comparison

**Folded metrics.** Picking the nearest point means maximising the projection
I·Is + Q·Qs. Points s and s+4 are antipodal, so one projection per antipodal pair is
enough:

```
C0 = |I|     C1 = |0.707 (I+Q)|     C2 = |Q|     C3 = |0.707 (Q-I)|
```

The sign of each projection tells which point of the pair is nearer, and it is kept
for the path labels. 0.707 is 181/256, rounded.

**Candidates.** With folded metrics, a candidate is a tuple of metric indices
(i0, i1, i2, i3), and its value is C0[i0] + C1[i1] + C2[i2] + C3[i3]. Taking the
mapping mod 4 gives:

```
i0 = 2*x8 + x4
i1 - i0 = 2*x6 + x2        i2 - i0 = 2*x5 + x1        (mod 4)
i3 = s + 2*x3 + x0,  where s = i1 + i2 - i0           (mod 4)
```

So BM x3x2x1x0 is the best of 16 candidates. These come from the free choice of
x8, x4, x6 and x5.

**The grouping trick.** Among the 16 candidates of one BM, the Z3 index takes only
four values, one for each value of s. The unit therefore works in five steps:

1. Add stage 1: C0[i0] + C1[i1] for all 16 index pairs.
2. Add stage 2: add C2[i2]. This gives all 64 three-dimensional sums.
3. Comparison step 1: for each (x2, x1) and each s, keep the best of the four partial
   sums that share s. This leaves 16 group survivors. Each survivor serves four BMs,
   the ones that differ only in x3 and x0.
4. Add stage 3: for each BM, add C3[s + 2*x3 + x0] to its four group survivors.
5. Comparison step 2: take the best of those four.

The cost is 16 + 64 + 64 = 144 additions and 48 + 48 = 96 comparisons. Each
comparison tree also carries the winning indices, so the path of every BM comes out
with it.

**Maximum BM.** Every one of the 256 index tuples is a candidate of some BM. So the
largest BM equals the sum of the four per-dimension maxima of C. The unit computes
this in parallel with the BMs, and it is ready at the same time. In the lower rate
modes not every tuple is allowed. There Z0's maximum is limited to the allowed i0,
and the sum is only an upper bound.

**Pipeline.** There are three register stages: after the metrics, after comparison
step 1, and after the BMs. Outputs follow the input by 3 clocks.

## Hybrid T-algorithm and SPEC-T estimate

The ACSU computes, for every state j:

```
PM_j(n) = max over the 8 branches k into j of  PM_p(n-1) + BM_{k,x0(p)}(n),  p = prev_state(j,k)
```

Metrics are maximised, and PMs are 12-bit numbers compared modulo 4096.

- **T-algorithm on BMs** (`bm_purge`): a BM survives when `bm_max - BM <= t_bm`.
  This step is feed-forward and stays outside the ACS loop.
- **T-algorithm on PMs**: a state survives when `est - PM <= t_pm`.
- **Hybrid rule**: an addition is performed only if the predecessor state and the BM
  both survived. A state that receives no enabled branch is purged. A purged state's
  survivor register is not updated, which is where clock gating would save power.
- **SPEC-T estimate** (`pm_estimator`): no stage can add more than the largest BM.
  So `est(n) = est(n-1) + bm_max(n)` is an upper bound on the true optimum, and it is
  available without searching 64 PMs.
  - Every `COMP_PERIOD` stages (default 4), a pipelined 64→16→4→1 maximum tree finds
    the real optimum of one stage. This takes 3 clocks and runs outside the loop.
  - The error `est - real` of that stage is then subtracted from the running estimate.
  - The period must be at least 4. Otherwise a second sample would be taken before
    the first correction reached the estimate, and the same drift would be removed
    twice. An elaboration-time check enforces this.
- **Safeguard** (this design's addition): a stage can leave no survivor at all. This
  happens when no branch is enabled anywhere, or when every state fails the PM test.
  The correct path is then lost, so every state restarts with PM = est, which puts
  the true state back in the set. If the surviving wrong states were kept instead, a
  noiseless stream after a bad burst never locked again; restarting fixes that.
  Separately, if all 16 BMs would be purged (possible only when `bm_max` is an upper
  bound), all are kept.

`bm_purge_en` and `pm_purge_en` turn the two halves on and off. The same hardware
therefore also runs as a full-trellis decoder, a BM-only T-algorithm decoder or a
PM-only T-algorithm decoder. `n_add` reports the number of additions performed in
each stage; the full trellis needs 512.

Measured with `tb_complexity` (Rm = 11/12, thresholds 0.3 = 10 LSB, 1500 symbols per
point, this testbench's noise model):

| Es/N0 | full | T on PMs | T on BMs | hybrid | hybrid, T-bm = 0.4 |
|---|---|---|---|---|---|
| ~15.1 dB | 512 | 16 | 215 | 5 | 8 |
| ~13.1 dB | 512 | 31 | 228 | 12 | 19 |
| ~11.5 dB | 512 | 63 | 241 | 28 | 46 |
| ~10.2 dB | 512 | 135 | 259 | 77 | 116 |

Summed over the four noise levels (66,000 bits per mode), the decoded bit errors were
1722 with T on PMs, 1317 with the hybrid, and 973 with the hybrid at a BM threshold
of 0.4. Errors come in bursts of a hundred or more bits, so these counts only show
that purging BMs as well costs no accuracy. They are not a BER curve.

The cost with BM purging alone stays almost flat as the noise changes. The cost with
PM purging follows the channel. The hybrid needs less than half of the PM-only
additions. In the published results the BM-only decoder becomes cheaper than the
PM-only one at low signal-to-noise ratio. Over the range measured here that crossing
is not reached: at ~10.2 dB the BM-only decoder still needs more additions. The
crossing depends on the code, the noise level and the threshold scaling, and none of
them is known to match the published setup.

## Survivor memory, path delay and output

`smu_re` keeps one register per state, holding `SMU_DEPTH` 4-bit entries. When state
j is updated with winning branch k, its register becomes the register of
p = prev_state(j,k), shifted by one entry, with {k, x0(p)} appended. The decoded
index is the oldest entry of the lowest-numbered surviving state.

`path_delay` is a circular buffer of `SMU_DEPTH` stages of 16 paths. It is written
with the same strobe as the survivor memory, so its oldest stage lines up with the
decoded index. The paths go through two registers first, so that they reach the
buffer together with their stage's decisions.

**Latency.** With an unbroken input stream, a symbol's decoded word appears
`SMU_DEPTH + 6` clocks after the symbol is sampled: TMU 3, BM purge 1, ACS 1,
survivor memory `SMU_DEPTH`, differential decoder 1. `in_valid` may have gaps. The
last `SMU_DEPTH - 1` symbols of a burst come out only when further symbols push them
through.

## Rate modes

Lower rates send fewer uncoded bits. The missing bits are transmitted as 0, and the
TMU excludes the candidates that would need them. The number of candidates per BM is
2, 4, 8 and 16 for Rm = 8/9, 9/10, 10/11 and 11/12. Which bits are dropped is this
design's choice:

| Rm | bits sent as 0 |
|---|---|
| 10/11 | x5 |
| 9/10 | x5, x6 |
| 8/9 | x5, x6, x4 |

x8 is kept in 8/9 so that `a` stays even and the mod-8 differential code stays
closed. This allows 90° ambiguity resolution in that mode.

## Interface of `tcm_decoder`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` | in | 1 | a 4-D symbol is on `in_sym` |
| `in_sym` | in | 4 x {I,Q} x 7 | Z0..Z3; unit amplitude = 32 LSB |
| `rate` | in | 2 | 0 = 8/9, 1 = 9/10, 2 = 10/11, 3 = 11/12 |
| `bm_purge_en`, `pm_purge_en` | in | 1 | enable the two T-algorithm halves |
| `t_bm`, `t_pm` | in | 9, 12 | thresholds in LSB; 0.3 of the amplitude = 10 (`T_BM_DEFAULT`, `T_PM_DEFAULT`) |
| `out_valid`, `out_bits` | out | 1, 11 | decoded x11..x1; bits the mode does not carry are 0 |
| `n_add`, `stage_valid` | out | 10, 1 | additions in the last ACS stage |
| `state_alive` | out | 64 | surviving states |
| `ev_bm_all_kept`, `ev_fallback`, `ev_restart` | out | 1 | safeguard strobes (`ev_fallback` = restart caused by the PM test) |
| `ev_comp`, `spec_real`, `spec_err` | out | 1, 12, 12 | SPEC-T correction strobe, searched optimum, estimation error |

`rate`, the enables and the thresholds should be changed while no symbol is in flight.
`rate` is sampled when a symbol enters the TMU. After reset every state is alive with
PM 0, so decoding can start at any point of a stream. The differential decoder's
previous value starts at 0, matching an encoder that starts at 0.

Parameters: `SMU_DEPTH` (26) sets the survivor memory and path delay depth.
`COMP_PERIOD` (4, minimum 4) sets how often the SPEC-T correction samples a stage.

## Where this RTL departs from or adds to the published architecture

- **The convolutional code is a placeholder.** It must be replaced by the
  transmitter's code. The published text calls for a 64-state rate-3/4 code but does
  not give its generator.
  - `tcm_pkg` holds a systematic feedback code, defined by parity-check polynomials
    H0..H3 = 103, 024, 030, 042 (octal).
  - Every part of the decoder derives its trellis from these four constants.
  - Replace them with the transmitter's code. H0 must have its D^0 and D^6 terms set;
    H1..H3 must have both clear.
- **Word lengths.**
  - The 7-bit input follows the published finite-word-length study.
  - The 32-LSB unit amplitude, 7-bit metrics, 9-bit BMs and 12-bit PMs are this
    design's own. The published ACSU's flip-flop count suggests 9-bit PMs under a
    different metric scaling.
- **Survivor depth.** `SMU_DEPTH` = 26 is chosen here. It makes the total register
  count roughly comparable to the published one, but nothing in the source fixes it.
- **SPEC-T correction.** The correction search (a 3-stage tree, every 4 stages) is
  this design's reading of "find the real optimal PM in a number of cycles".
- **Safeguards.** The restart of all states and the keep-all-BMs rule are additions.
- **Rate modes.** Which uncoded bits are dropped in the lower rate modes, and the use
  of the sum of per-dimension maxima as a bound in those modes, are this design's
  choices.
- **Choice of output state.** Taking the output from the lowest-numbered surviving
  state, instead of the best one, is a simplification.
- **The mapping equation.** It is used with weight 1 on the (x2, x1, x2+x1+x0) term.
  This is the weight the BM groupings require: x0 moves the Z3 metric index by one.
- **Transmitter.** The transmitter (differential encoder, convolutional encoder,
  mapper, modulator) is not part of the RTL. The testbenches model it in
  `tb/tcm_tx_pkg.sv`.

## Verification

Each module has a self-checking testbench. Each ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_euclid_metric` | all 16384 (I,Q) pairs against signed projections on the 8 points |
| `tb_tmu` | every BM against a brute-force search over all allowed parallel transitions, in all four modes; each path demaps to its index and scores its BM; `bm_max`; 3-clock latency |
| `tb_bm_purge` | keep flags, safeguard, pass-through, 1-clock latency |
| `tb_acsu` | PMs, survival, decisions, addition count, restarts against a model built by forward enumeration of the encoder (which also checks that every state has 8 distinct predecessors) |
| `tb_pm_estimator` | the estimate and its corrections clock by clock against a reference, with input gaps and empty survivor sets |
| `tb_smu_re`, `tb_path_delay` | against list models, with gaps |
| `tb_demapper` | all 4096 words through the mapping and back |
| `tb_diff_decoder` | a differentially encoded random stream |
| `tb_tcm_decoder` | end to end at default sizes (see below) |
| `tb_complexity` | the addition counts above; full trellis = 512; hybrid below both single modes; a BM threshold of 0.4 costs more additions than 0.3 but fewer than PM-only; summed hybrid bit errors within 30% (+150 bits) of the PM-only decoder's |

`tb_tcm_decoder` uses a transmitter model: differential encoder, the convolutional
encoder written from its parity-check equation (not the observer form the decoder
uses), mapper, and a noisy modulator. The decoder must return every information word.
The test covers:

- noiseless input with a latency check
- noise with input gaps
- all four rate modes
- full-trellis operation
- a heavy-noise burst with zero thresholds, which forces restarts
- recovery after that burst without a reset

Every SPEC-T error must be non-negative. The test also counts BM purges, state purges,
corrections, rate switches, gaps and safeguards, and fails if any of them never
happened.

To simulate with Verilator (packages first):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_tcm_decoder \
  rtl/tcm_pkg.sv tb/tcm_tx_pkg.sv rtl/euclid_metric.sv rtl/tmu.sv rtl/bm_purge.sv \
  rtl/acsu.sv rtl/pm_estimator.sv rtl/smu_re.sv rtl/path_delay.sv rtl/demapper.sv \
  rtl/diff_decoder.sv rtl/tcm_decoder.sv tb/tb_tcm_decoder.sv
./obj_dir/Vtb_tcm_decoder
```

Use the same command for any other testbench, with its own top module and file. All
testbenches finish within seconds. Lint the design with
`verilator --lint-only -Wall rtl/tcm_pkg.sv <other rtl files> --top-module tcm_decoder`.
The remaining lint warnings are unused package constants and unused bits.

**How far to trust it.** Every block is checked against a model written separately
from the RTL. The full chain decodes error-free at moderate noise in every mode. The
error rates have not been compared with published BER curves. The clock frequency,
the FPGA resource use, and the choices listed in the previous section have not been
checked against a real transmitter.
