# Stochastic computing with re-arranging SN duplicators

Stochastic computing (SC) represents a number in [0, 1] as a stream of random bits
whose fraction of 1s is the value. Arithmetic then becomes almost free: an AND gate
multiplies two streams, a NAND gate computes 1 - a*b, a 2:1 multiplexer adds with a
factor 1/2. The catch is that those identities hold only if the streams entering a
gate are statistically independent. Feed the same stream into both inputs of an AND
gate and you get x, not x^2.

Every polynomial worth computing uses its input more than once. So an SC circuit
needs a cheap way to turn one stream into a second stream that has the same value
but uncorrelated bits. That circuit is an **SN duplicator** (SN = stochastic number).
This repository implements three duplicators that shuffle the order of the bits
using a random bit stream:

* **FSR**: a two-flip-flop selector.
* **RRR**: a two-register re-arrangement circuit.
* **2^n RRR**: RRR generalised to 2^n registers.

All three have zero cycles of latency and need only a handful of gates and flip-flops
beyond an LFSR. Around them are built:

* the function circuits that use them: x^2, x^8, and Taylor approximations of sin,
  cos, tanh and exp(-x^2);
* a family of flip-flop window circuits for step, band, absolute-value and
  piecewise (discontinuous) functions;
* a top-level evaluator (`sc_top`). It drives one input value through all of these
  circuits at once and counts the results back into binary.

The circuits and their analysis come from the thesis *Hardware Optimization of
Stochastic Computing*. Equation numbers quoted in comments (for example "Eq. 2.18")
refer to that thesis. The formulas themselves are repeated below, so the code can be
read without it.

## Stochastic numbers, generators and counters

A uni-polar SN of length L carrying value v has about v*L ones. A bi-polar SN reads
the same stream as 2*P(1) - 1, which covers [-1, 1]. In bi-polar form XNOR
multiplies; the absolute-value circuit below uses this.

* **`lfsr`**: a Galois LFSR of `WIDTH` bits with a maximal-length mask, so its state
  runs through all 2^W - 1 non-zero values.
* **`sn_gen`**: an LFSR plus a comparator. It outputs `sn = (rnd <= value)`. Over
  one full LFSR period, which is L = 2^W - 1 bits, the stream holds exactly `value`
  ones. This is why the whole design works with SN lengths of the form 2^W - 1:
  255 bits for W = 8 and 4,095 bits for W = 12.
* **`sn_to_bin`**: counts the 1s of a stream during L enabled cycles, then raises
  `full` and holds the result. `count / L` is the value.

## The duplicator problem, concretely

Take the squarer y = x AND x', where x' is a copy of x.

* The oldest and simplest copy is x delayed by one flip-flop. For a single squarer
  this works: x[i] and x[i-1] are independent bits.
* Chain three squarers to get x^8 and it breaks. The delayed paths re-converge, and
  the product is made of only a few distinct bits. Writing the cascade out bit by
  bit shows that the output is x[i] x[i-1] x[i-2] x[i-3]. Its expected value is
  **x^4, not x^8**, however long the stream. `tb_sc_pow8` reproduces this with the
  single-FF duplicator (`dup_nrrr` with `N_LOG = 0`).
* The fix is to pick the copied bit at random from a small pool of recent input
  bits, so the delay differs from bit to bit and from duplicator to duplicator.
  That is what the three duplicators do. They differ in how they choose the bit.

In all three duplicators, the output bit of cycle i is available combinationally
in cycle i. The flip-flops only hold earlier input bits, so the duplicator adds no
pipeline latency. The only hardware beyond the flip-flops is a multiplexer and an
LFSR for the random bits r.

### FSR duplicator (`dup_fsr`)

Two flip-flops form a two-stage shift register of the last two input bits. The
random bit chooses which of the two is output:

    Out[i] = r[i] ? In[i-1] : In[i-2]

The output value equals the input value in expectation. Some input bits are output
twice and some never, so over a finite stream the count of 1s wanders by a few bits.

In the x^8 cascade, the copies are still correlated whenever two duplicators choose
the same delay. For FSR in all three stages the expected result is

    E[y] = 3/8 x^6 + 3/8 x^5 + 1/4 x^4            (Eq. 2.13)

This is better than x^4 but still far from x^8.

### RRR duplicator (`dup_rrr`)

RRR keeps two registers, FF0 and FF1. In each cycle the random bit r picks one of
them. That register's bit is output, and the register is refilled with the current
input bit:

    Out[i]    = FF[r[i]]
    FF[r[i]] <= In[i]

In closed form, Out[i] is the input bit from the most recent earlier cycle j < i in
which r[j] = r[i]. Before such a cycle exists, it is the register's initial bit.

The important property is that every input bit is output exactly once. The only
exceptions are the two bits still stored at the end and the two initial bits output
at the start. The output therefore has the input's count of 1s to within 2, and it
is a true re-arrangement of the input bits. The delay varies geometrically (1, 2, 3…
cycles with probability 1/2, 1/4, 1/8…), which decorrelates cascades much better
than FSR:

    E[y] = 16/105 x^8 + 2/15 x^7 + 13/35 x^6 + 1/5 x^5 + 1/7 x^4   (Eq. 2.18)

### 2^n RRR duplicator (`dup_nrrr`)

This is RRR with 2^n registers, selected by an n-bit random number. The delays get
longer and more varied as n grows, so re-converging paths are less likely to line up
and the result approaches x^8. The price is that up to 2^n initial bits appear in
the output and 2^n input bits stay behind, so the count error grows to 2^n bits.

For 255-bit streams the best trade-off reported is n = 1, the default here. For
4,095-bit streams it is n = 2.

* `N_LOG = 0` degenerates to the single-flip-flop delay.
* `N_LOG = 1` behaves exactly like `dup_rrr`.

`tb_sc_pow8` measures all of these at once. For x = 0.5, 0.7 and 0.9:

* 1RRR gives x^4;
* FSR follows Eq. 2.13;
* RRR and 2RRR follow Eq. 2.18;
* 8RRR lands closest to x^8.

### Random bits and initial state

Each duplicator is wrapped with its own LFSR in `sc_dup`, which uses the LFSR's
low bit (FSR, RRR) or its n low bits (2^n RRR) as r.

* The seeds come from `sc_pkg::seed_of`, so every random source in the design starts
  at a different phase.
* Sharing bits of one LFSR between several duplicators would save area and is an
  equally valid choice. Giving each duplicator its own LFSR is this design's choice.
* Initial register contents are 0, 1, 0, 1… (FF0 = 0, FF1 = 1). These bits leak into
  the first output bits.

## Function circuits

| module | computes | structure |
|---|---|---|
| `sc_squarer` | x^2 | x AND dup(x) |
| `sc_pow8` | x^8 | three `sc_squarer`s in series |
| `sc_sin` | sin'(x) = x(1 - x^2/6 (1 - x^2/20 (1 - x^2/42))) | squarer, 3-stage Horner chain, AND with x |
| `sc_cos` | cos'(x) = 1 - x^2/2 (1 - x^2/12 (1 - x^2/30 (1 - x^2/56))) | squarer, 4-stage Horner chain |
| `sc_tanh` | tanh'(x) = x(1 - x^2/3 (1 - 2x^2/5 (1 - 17x^2/42 (1 - 62x^2/153)))) | squarer, 4-stage Horner chain, AND with x |
| `sc_exp_neg_sq` | exp'(-x^2) = 1 - u(1 - u/2 (1 - u/3 (1 - u/4 (1 - u/5)))), u = x^2 | squarer, 5-stage Horner chain |

The primes mark the truncated series that the circuits evaluate; the testbenches
compare against these polynomials.

### Horner chains (`sc_horner`)

All four polynomials have the nested form 1 - c0 u (1 - c1 u (1 - …)). In SC each
level "1 - a*b*c" is a single 3-input NAND gate. So a K-term polynomial is a chain
of K NAND gates, from the innermost term outwards.

* Each coefficient c_k is a constant stream from its own `sn_gen`. The coefficient
  is rounded to `value/(2^W-1)`; for example 1/6 becomes 43/255.
* Every NAND needs its own independent copy of u, so u passes through a chain of
  K-1 duplicators:
  * the innermost NAND gets u itself;
  * each level further out gets the next, more-delayed copy.
* For sin' and tanh' the last AND uses the undelayed x. That x shares its current
  bit with only one copy of x^2: the undelayed one in the innermost NAND. All the
  other copies come out of duplicators and hold earlier bits. The innermost term
  is multiplied by every outer coefficient, so the resulting bias is small: at most
  1.2·10^-5 for sin' and 1·10^-3 for tanh' over 0 ≤ x ≤ 1.

The number of duplicators in series is what drives the latency of the alternative,
buffer-based duplicators. Here it costs nothing, because every duplicator has zero
latency.

## Step, band, absolute value and piecewise functions

### Step (`sc_step`)

The step circuit keeps the last N = 2^n - 1 input bits in a shift register,
counts the ones, and outputs the count's MSB, which is 1 when the window holds a
majority of ones. For an input with P(1) = p, the output value is the binomial
majority probability:

    E[y] = sum_{k=(N+1)/2..N} C(N,k) p^k (1-p)^(N-k)      (Eq. 4.4)

This is a sigmoid around 1/2 that sharpens as N grows.

* **Window and timing.** The output is formed from the flip-flops alone, so output
  bit i depends on input bits i-N … i-1. With N = 1 the circuit is a plain
  one-cycle delay.
* **Initial window.** After reset the window holds 1, 0, 1, 0 … 1 (newest first).
  This balances the first outputs around 1/2.
* **Band step (`BAND = 1`).** The output is the XOR of the count's two top bits.
  It is 1 while N/4 <= count < 3N/4, which approximates a pulse that is 1 for
  1/4 < p < 3/4. Moving a threshold means only choosing different count bits.

### Absolute value (`sc_abs`)

Read the input as bi-polar: a = 2p - 1. The circuit outputs XNOR(a, step(a)).

* If a > 0, the step output is mostly 1, and XNOR passes a unchanged.
* If a < 0, the step output is mostly 0, and XNOR inverts a, giving -a.

The result is |a|. Close to a = 0 the step is not sharp, so the output there is
pulled towards 0.

### Piecewise function (`sc_discont`)

This circuit computes

    y = c ? cos'(x) : sin'(x)

built as (cos' AND c) OR (sin' AND NOT c). Here c is the band step of x, so the
function jumps from sin' to cos' at x = 1/4 and back at 3/4.

All three sub-circuits see the same input stream. With a window of N bits the
selection is soft: the expected output is alpha·cos'(x) + (1 - alpha)·sin'(x),
where alpha = P(N/4 <= Bin(N, x) < 3N/4). The testbench checks exactly this blend.

## The evaluator (`sc_top`)

`sc_top` evaluates every function above for one input value.

* **Start.** A one-cycle `start` latches `x_val`. It also resets all function
  circuits to their seeds and initial bits and clears the counters.
* **Run.** For the next L = 2^LFSR_W - 1 cycles, `busy` is high. One input bit and
  one output bit per function are produced per cycle, and they are visible on
  `x_sn` and `fn_sn`.
* **Done.** After the L-th bit, `done` pulses for one cycle, registered. `res[f]`
  then holds the number of 1s in function f's output stream, so its value is
  `res[f] / L`. The results stay until the next start.

A `start` during a run restarts cleanly. With the default 8-bit LFSRs a run is 255
bits. `done` rises L + 1 clock edges after the edge that sampled `start`.

| index (`sc_pkg::fn_e`) | output |
|---|---|
| 0 `FN_SQ` | x^2, 2^n RRR |
| 1 `FN_POW8_FSR` | x^8, FSR duplicators |
| 2 `FN_POW8_RRR` | x^8, RRR duplicators |
| 3 `FN_POW8` | x^8, 2^n RRR duplicators |
| 4 `FN_SIN` | sin'(x) |
| 5 `FN_COS` | cos'(x) |
| 6 `FN_TANH` | tanh'(x) |
| 7 `FN_EXP` | exp'(-x^2) |
| 8 `FN_STEP` | step at 1/2 |
| 9 `FN_BAND` | 1 for 1/4 < x < 3/4 |
| 10 `FN_ABS` | \|2x - 1\| (input read as bi-polar) |
| 11 `FN_DISC` | cos'(x) inside the band, sin'(x) outside |

Parameters of `sc_top`:

| parameter | default | meaning |
|---|---|---|
| `LFSR_W` | 8 | LFSR and counter width; SN length 2^LFSR_W - 1 (12 gives 4,095-bit SNs) |
| `DUP_LOG` | 1 | n of the 2^n RRR duplicators used by all function circuits |
| `STEP_LOG` | 4 | window of the step circuits, N = 2^STEP_LOG - 1 (up to 10 gives N = 1,023) |

With the defaults, synthesis with yosys gives about 690 cells and 784 flip-flops.

### What to expect from the numbers

A single 255-bit run is one random trial, so results scatter around the ideal value.

* Typical deviations seen in the end-to-end test are a few hundredths for the
  polynomials.
* At 255 bits, x^8 follows Eq. 2.13 and 2.18 rather than the true x^8.
* Those equations assume independent input bits. The evaluator's own input
  generator is an LFSR with a comparator, and consecutive bits of its stream are
  correlated. With 4,095-bit streams the x^8 units therefore land between the
  analysis and x^8. For example, at x = 0.78 RRR gives 0.14, against 0.24 from
  Eq. 2.18 and a true x^8 of 0.14.
* The step functions follow the binomial curve of a 15-bit window.

Seeds are parameters, so the same `x_val` always gives the same result. To average
several trials, instantiate the circuits with different seeds.

## Measured accuracy

Two sweep testbenches repeat the published accuracy experiments on this RTL.

**Duplicators (`tb_dup_accuracy_eval`).** The sweep uses:

* input streams of 255 and 4,095 bits with exactly round(Lx) ones in random order;
* x = 0, 0.1 … 1;
* 100 trials per value at 255 bits and 20 at 4,095 bits.

The error is the mean square error against the target polynomial. At 255 bits:

| function | 1RRR | 2RRR | 4RRR | 8RRR | FSR | RRR | published 2RRR |
|---|---|---|---|---|---|---|---|
| x^2 | 1.3e-4 | 1.3e-4 | 1.3e-4 | 1.5e-4 | 2.1e-4 | 1.2e-4 | 1.22e-4 |
| x^8 | 1.4e-2 | 2.2e-3 | 5.3e-4 | 1.0e-3 | 6.8e-3 | 2.1e-3 | 2.66e-3 |
| sin' | 7.6e-5 | 5.3e-5 | 7.0e-5 | 1.5e-4 | 6.8e-5 | 6.1e-5 | 9.01e-5 |
| cos' | 1.7e-4 | 2.3e-4 | 2.1e-4 | 1.2e-3 | 2.8e-4 | 1.7e-4 | 1.67e-4 |
| tanh' | 1.6e-4 | 1.0e-4 | 9.9e-5 | 9.7e-5 | 1.3e-4 | 1.0e-4 | 1.41e-4 |
| exp'(-x^2) | 8.4e-4 | 2.5e-4 | 6.2e-4 | 1.4e-3 | 8.5e-4 | 2.5e-4 | 2.29e-4 |

What the table shows:

* The ordering for x^8 is reproduced, down to the published FSR and RRR values
  (6.73e-3 and 2.56e-3): the one-flip-flop duplicator is far worse than FSR, which
  is worse than RRR.
* 8RRR suffers at 255 bits. Up to 8 initial bits get into each output, and up to 8
  input bits are lost. These count errors outweigh its better decorrelation.
* In this implementation 4RRR comes out slightly better than 2RRR on average.
  The published comparison favours 2RRR at 255 bits. Its 4RRR and 8RRR errors
  are higher than measured here (x^8: 6.62e-3 and 1.57e-2), which points to a
  larger initial-state error in the published setup.
* The published 1RRR errors agree with these, except sin', where 2.90e-4 is
  published.

At 4,095 bits:

| function | 1RRR | 2RRR | 4RRR | 8RRR | FSR | RRR | published 4RRR |
|---|---|---|---|---|---|---|---|
| x^2 | 7.6e-6 | 7.8e-6 | 7.0e-6 | 7.1e-6 | 1.1e-5 | 9.9e-6 | 1.50e-5 |
| x^8 | 1.4e-2 | 2.4e-3 | 4.5e-4 | 9.9e-5 | 7.0e-3 | 2.3e-3 | 1.80e-3 |
| sin' | 4.3e-6 | 4.3e-6 | 4.1e-6 | 3.7e-6 | 5.0e-6 | 3.9e-6 | 2.45e-5 |
| cos' | 1.7e-5 | 1.0e-5 | 1.1e-5 | 1.0e-5 | 2.0e-5 | 9.8e-6 | 1.75e-5 |
| tanh' | 2.6e-5 | 7.4e-6 | 6.5e-6 | 1.3e-5 | 2.3e-5 | 9.3e-6 | 4.23e-5 |
| exp'(-x^2) | 4.3e-4 | 1.7e-5 | 1.3e-5 | 1.4e-5 | 6.0e-4 | 1.9e-5 | 1.30e-5 |

* With longer streams the larger duplicators pay off. For x^8 the error falls
  steadily from 1RRR to 8RRR. The initial-state error of 8RRR is now spread
  over 4,095 bits.
* The measured 4RRR errors are at or below the published ones: about 1/4 for
  x^8 and about 1/6 for sin' and tanh'. The input streams here carry exact
  counts, so only the duplication error remains.
* sin' is already at its floor with 1RRR. The source reports 2.23e-4 for 1RRR,
  which this sweep does not reproduce.

**Window circuits (`tb_step_family_eval`).** The sweep uses:

* 10,000-bit streams;
* 101 input values;
* window sizes N = 1 … 1023.

The error is the MSE against the ideal functions, taking the midpoint at a threshold.

* **Step:** matches the published values to within a few percent at every N.
  The error falls from 8.0e-2 at N = 1 to 1.6e-3 at N = 1023.
* **Absolute value:** within a factor of 1.6. The error falls from 3.3e-2 to about
  5e-6.
* **Piecewise function:** stops improving at about 1.7e-3 for N ≥ 511. The preloaded
  window (half ones) starts inside the band. For inputs near 0 or 1, the band step
  therefore needs about N/2 cycles to leave the band, and during that time it picks
  the cos' branch. With a 1023-bit window that is 5% of a 10,000-bit stream.
  Below N = 511 the measured errors are about 2/3 of the published ones.
* **Duplicators in the piecewise function:** the size of the 2^n RRR makes almost
  no difference, here or in the published results (1RRR to 8RRR within about
  10%). The error of the band step near x = 1/4 and 3/4 dominates.
* **Band step at its thresholds:** at x = 1/4 and 3/4 the output is
  P(N/4 <= Bin(N, x) < 3N/4). This is 0.563 for N = 3 and falls towards 1/2 for
  larger N (0.505 at N = 1023). The measured values follow it. Each is measured on
  a 100,000-bit stream of independent bits, ignoring the first N outputs.

## Where this design departs from, or adds to, the source

* **Horner chains.** The circuits for sin', cos', tanh' and exp'(-x^2) are rebuilt
  from their nested formulas. Which delayed copy of x^2 feeds which NAND level, and
  the coefficient generators, are this design's choices. The number of duplicators
  in series matches the source's latency figures (3 for sin', 4 for cos').
* **tanh coefficient.** The tanh' series has coefficient 62/2835 on x^9. The nested
  form's last factor, 62/153, is used.
* **Reset, seeds, LFSR polynomials and the start/done control** are not specified
  by the source. All LFSRs, duplicator registers and step windows have a synchronous
  active-low reset.
* **The evaluator.** Collecting all circuits behind one generator and one counter
  bank is an arrangement for demonstration and test. The source evaluates each
  circuit on its own.
* **Generator comparator.** The SN generator outputs 1 when the random number is
  <= the value, which gives exact counts over one LFSR period.
* **Not included:** a duplicator that regenerates a fresh SN from a counted value
  (the buffer-based approach these duplicators are compared with), and
  binary-arithmetic reference circuits.

## Simulating

Every testbench is self-checking. Each prints `TB_RESULT checks=<n> failures=<m>`
and has a cycle watchdog. With Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb rtl/sc_pkg.sv tb/tb_sc_top.sv \
              --top-module tb_sc_top -o sim
    ./obj_dir/sim

Replace `tb_sc_top` with any other testbench:

| testbench | what it checks |
|---|---|
| `tb_lfsr` | maximal period and the recurrence, 8 and 12 bits |
| `tb_sn_gen` | exact count of 1s per period |
| `tb_sn_to_bin` | counting against a reference model, enable and clear |
| `tb_dup_fsr`, `tb_dup_rrr` | bit-exact against the defining equations; value preserved |
| `tb_dup_nrrr` | n = 0…3: closed form, count error <= 2^n, mean delay about 2^n |
| `tb_sc_squarer`, `tb_sc_sin`, `tb_sc_cos`, `tb_sc_tanh`, `tb_sc_exp_neg_sq` | value against the polynomial over 4,080-bit streams; zero latency |
| `tb_sc_pow8` | x^4 collapse, Eq. 2.13, Eq. 2.18, 8RRR best |
| `tb_sc_step` | bit-exact window and count, binomial law, band |
| `tb_sc_abs`, `tb_sc_discont` | bit-exact gate level and value laws |
| `tb_sc_top` | end to end at default size; restart; each mechanism exercised |
| `tb_sc_top_4095` | the same end-to-end test with 4,095-bit SNs (`LFSR_W = 12`) and 4RRR duplicators |
| `tb_dup_accuracy_eval` | MSE sweep of all function circuits with six duplicator choices, at 255 and 4,095 bits (about 10 s) |
| `tb_step_family_eval` | MSE sweep of step, absolute-value and piecewise circuits (1RRR to 8RRR), N = 1…1023, and the band step at its thresholds (about 25 s) |

The block testbenches drive Bernoulli streams made with `$urandom`. Because those
streams are independent of the design's LFSRs, they test the circuits with
statistics and not just on one LFSR sequence.
