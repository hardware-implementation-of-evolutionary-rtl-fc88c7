# Evolutionary digital filter in hardware

An adaptive IIR filter whose coefficients are found by evolution rather than
by a gradient rule such as LMS. A population of candidate filters ("inner
filters", or individuals) all process the same input signal x(k). Each one is
scored by how closely its output follows a desired signal d(k) over a
*generation* of T0 samples. The best candidates are cloned with small random
perturbations (a local search), the weaker ones are paired up and their
midpoints perturbed (a global search), and the fittest member of every family
survives into the next generation. The filter's output y(k) is the output of
the fittest inner filter of the generation.

Because the search needs no gradient, it does not get stuck on a local minimum
of the error surface. Filters that go unstable saturate, score badly and die
out. The price is arithmetic: every generation evaluates
A = Nap(Nac+1) + 3Nsp/2 complete filters. With the default sizes that is
A = 1104. This RTL splits that work between a filtering side, which can be
replicated, and a reproduction side, which works alongside it.

The design follows a published hardware architecture: an FFC module
(filtering and fitness calculation) with parallel single filtering modules
(SFMs), an RS module (reproduction and selection), and a common memory. The
block structure, the number formats, the sizes and the algorithm come from
that architecture. The internal circuits, handshakes and timing are this
implementation's own. The last section lists where the two differ.

## Numbers and the inner filter

* All signals and coefficients are 16-bit **Q14** values: a sign bit and one
  integer bit, then 14 fraction bits, so the range is [-2, 2).
* Each inner filter is
  `y(k) = a1 y(k-1) + a2 y(k-2) + a3 y(k-3) + b0 x(k) + b1 x(k-1) + b2 x(k-2)`
  (N = 3 regressive taps and M = 2 moving-average taps). The products are
  summed at full precision. The sum is rounded (add 2^13, shift right 14) and
  saturated to 16 bits.
* An individual is `I = [W, S]` (`edf_pkg::indiv_t`). `W` holds the six
  coefficients, `w[0..2] = a1..a3` and `w[3..5] = b0..b2`. `S` is the filter
  state, `s[0..2] = y(k-1..k-3)` and `s[3..4] = x(k-1..k-2)`. The state travels
  with the coefficients, so a surviving filter carries on from where it stopped
  and its output has no start-up transient.
* Fitness = minus the sum over the generation of `e(k)^2` in Q14, with
  `e = d - y`. A larger fitness is better, and 0 is a perfect match. The
  32-bit sum saturates.
* The random vectors `n` in the reproduction rules are approximately
  Gaussian, with zero mean and unit variance. `gauss_rng` makes them by
  summing the four bytes of a xorshift32 state (the central-limit
  approximation). Its output is in Q11, so values up to about +-7 fit.

The orders N and M and the word formats are package constants in
`rtl/edf_pkg.sv`. The packed structs for an individual, a job and a result are
built from them.

## One generation, step by step

The generation is the unit of everything. `T0` samples (default 10) are
collected. Every individual is run over exactly those samples, and then the
population is updated.

1. **Collect.** `signal_input_buffer` stores x and d. It has two banks: one
   generation is evaluated while the next is being collected. If a sample
   arrives while both banks are full, it is dropped and `overrun` pulses.
2. **Reproduce and send** (`rs`). The population of P = Nap + Nsp = 64
   individuals is stored in rank order, with the fittest first. A
   *reproduction counter* walks the parents, and a comparator
   `counter > Nap-1` selects the mode:
   * **cloning** (the Nap fittest): the parent is sent as it is, then its Nac
     clones `W + r*n`. All of them start from the parent's state.
   * **mating** (the Nsp others): the mating parents are first shuffled
     (Fisher-Yates, driven by a xorshift generator), which gives Nsp/2 random,
     disjoint pairs (k, l). For each pair, k and l are sent, then their
     offspring `(W_k + W_l)/2 + s*n`, which starts from k's state.

   `r` and `s` (the inputs `r_fluct` and `s_fluct`, in Q14) set the size of
   these perturbations. In the very first generation (the *initial generation
   flag* is set), P random individuals `s*n` with zero state are sent instead.
3. **Filter** (`ffc`). The control module puts each individual in a free SFM.
   The SFM runs it over the T0 buffered samples, writes its T0 outputs into
   its output buffer, and computes the fitness. The output unit copies the
   outputs into the common memory at row `id*T0 + n` and returns
   `[W, S, f]` with the tag to the RS side.
4. **Select, as results arrive.** Each result carries a tag: an evaluation
   index, a survivor slot and a role. A cloning family keeps its fittest
   member. A mating pair keeps its fitter parent and always keeps its
   offspring, which preserves diversity. Survivors are written into the second
   bank of `individual_memory`. The RS side also remembers the fittest
   evaluation of the whole generation.
5. **Rank, swap, output.** When all A results are in, the 64 survivors are
   ranked by fitness, one per cycle, using 64 comparators (ties go to the lower
   slot). The banks are then swapped. The T0 outputs of the fittest evaluation
   are read back from the common memory and leave on `y_valid`/`y_out`. The
   input bank is then released.

The common memory is needed because the winner is known only after all 1104
filters have run. It holds A*T0 = 11,040 words of 16 bits.

## Blocks

| module | what it is |
|---|---|
| `edf_top` | FFC + RS + common memory. The top level. |
| `ffc` | Filtering side: input buffer, Q SFMs with output buffers, control, output unit |
| `signal_input_buffer` | Two-bank buffer of x, d with one read port per SFM |
| `sfm` | One inner filter plus fitness, with a single shared multiplier |
| `sfm_output_buffer` | The T0 outputs of one SFM |
| `ffc_control` | One-entry individual input buffer; starts the lowest free SFM |
| `ffc_output` | Round-robin over finished SFMs: copies y to the common memory, returns [W,S,f] |
| `rs` | SRS control: reproduction counter, mode comparator, initial generation flag, shuffle, selection, ranking, output |
| `srs` | Reproduction arithmetic: pass, clone, mate, random initial individual |
| `gauss_rng` | Approximately Gaussian numbers |
| `individual_memory` | 2 banks x 64 individuals (current population and survivors) |
| `common_memory` | A*T0 x 16 bits, one write port and one synchronous read port |
| `edf_pkg` | Widths, the Q14 type, the individual/job/result structs, saturation |

## Interfaces and timing

`edf_top` parameters are `Q` (number of SFMs, default 1), `NAP`, `NAC` and
`NSP` (32 each) and `T0` (10). The common-memory depth follows from them.

* Input: hold `in_valid` high for one cycle per sample, with `x_in` and `d_in`.
* Output: after a generation has been evaluated, `y_valid` is high for T0
  consecutive cycles carrying that generation's y(k). `best_fit` holds the
  fitness of the filter that produced them. `gen_count` counts generations,
  `init_gen` is the initial generation flag, and `mate_mode` is the mode
  comparator.
* Reset: `rst_n`, asynchronous and active low. The memories are not reset.
  Every word of them is written before it is read.

Inside the design, the FFC-to-RS links are valid/ready handshakes. A result
can come back in a different order from its job when Q > 1, so results are
matched by their tag.

Cycle counts at the defaults:

* **SFM:** 8 cycles per sample. That is 6 multiply-accumulates, one cycle to
  form y and shift the delay line, and one cycle to square the error on the
  same multiplier. One individual therefore takes 80 cycles.
* **FFC output unit:** T0 + 2 cycles per individual.
* **RS:** one individual per cycle when the FFC is ready.
* **A whole generation:** 102,760 cycles with one SFM, about 9.3 cycles per
  individual and sample. On the identification task in `tb/tb_edf_top.sv`
  the error falls to zero within about 13 generations. With `Q = 21` a
  generation takes 13,417 cycles; the limit is then the serial copy of each
  individual's outputs into the common memory.
* **Maximum sampling rate:** T0 divided by the generation time, that is
  clock / 10,276 with one SFM, or clock / 1,342 with 21 SFMs. No timing
  analysis has been done for this RTL.

## Where this differs from the original architecture

* **The SFM.** In the original design the SFM is a small programmable
  processor: 45 instructions, a 256 x 16 program memory and two 128 x 16 data
  memories. Its instruction set and program are not available. Here the SFM
  is a fixed-function datapath that computes the same thing. It has none of
  those memories and is much faster per sample: 8 cycles against the
  original's 76.8. For the same reason the balance point between FFC and RS,
  21 SFMs in the original, is different here.
* **The returned result carries W as well as [S, f]**, so the RS side does not
  need to keep a copy of every offspring it has sent.
* **Individual memory.** The original lists a 1,024 x 16 individual memory and
  a 2,048 x 16 RS memory cell. Here that is two banks of 64 wide words, one
  individual per word.
* **Left unspecified by the original and chosen here:** the two-bank input
  buffer and its overrun rule; the burst timing of the output; the rounding
  and saturation rules; squared error as the fitness; the Gaussian generator;
  the shuffle that forms the mating pairs; the ranking circuit; which state an
  offspring inherits; the random initial population; and the tag format.
* **Limits.** The original also allows up to M = 3 moving-average taps. Here
  N and M are package constants (3 and 2). M = 3 needs `edf_pkg::M_MA`
  changed, after which every block adapts.

## Simulating

Every testbench is self-checking and ends with a `TB_RESULT checks=... failures=...`
line. Compile a testbench with its package first, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/edf_pkg.sv tb/tb_edf_top.sv --top-module tb_edf_top -o sim
./obj_dir/sim
```

The unit testbenches that use the reference models also need
`tb/edf_ref_pkg.sv` on the command line, after `rtl/edf_pkg.sv`.

* `tb_edf_top` runs the full-size design (all defaults) for 24 generations on
  an identification task, `d(k) = 0.5 d(k-1) + 0.3 x(k) - 0.2 x(k-1)`. For
  every generation it checks that the squared error of the outputs that come
  out equals the reported best fitness. It also checks the cycle rate, that
  the filter adapts, and that the initial generation, cloning, mating and an
  input overrun all occur. It runs in a few seconds.
* `tb_edf_q21` does the same with 21 SFMs.
* Unit testbenches: `tb_sfm` and `tb_ffc` (against a bit-exact reference
  filter in `tb/edf_ref_pkg.sv`); `tb_rs` (with a stand-in FFC that answers in
  random order; it checks the reproduction order, the pairing, the survivor
  ranking and the output selection); and `tb_srs`, `tb_gauss_rng`,
  `tb_signal_input_buffer`, `tb_individual_memory`, `tb_common_memory` and
  `tb_sfm_output_buffer`.
