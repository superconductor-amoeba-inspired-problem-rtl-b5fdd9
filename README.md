# An amoeba-inspired stochastic solver for the NOR problem

This is a cycle-level digital model of a small superconducting solver. The solver
finds bit vectors that satisfy a ring of logical constraints. It does this by
stochastic local search, and it needs no annealing schedule. The original circuit
uses adiabatic quantum-flux-parametron (AQFP) gates. In those gates thermal noise
makes a weakly driven gate switch to the wrong state, and a bias current sets how
often that happens. This RTL keeps the circuit's gate structure and phase timing.
It replaces the physical noise with per-gate pseudo-random numbers and the bias
current with a digital probability code.

## The problem and the search rule

The NOR problem asks for `N` bits on a ring such that every bit is the NOR of its
two neighbours:

    x_i = NOR(x_{i-1}, x_{i+1}),   indices wrap around (x_0 = x_N, x_{N+1} = x_1)

For `N = 4` there are exactly two solutions, (0,1,0,1) and (1,0,1,0). Larger rings
have more.

The amoeba-inspired search updates every variable at once in each iteration:

1. **Observe.** All variables are read.
2. **Constraint update.** Each variable becomes `X_i = NOR(x_{i-1}, x_{i+1})`.
   A variable that already meets its constraint keeps its value, and one that
   does not is flipped.
3. **Stochastic failure.** An update that should produce 0 produces 1 instead,
   with probability `p`.

Step 3 matters. Without it, a ring started at all-0 is stuck forever: all-0 gives
all-1, and all-1 gives all-0 again. This is the *deadlock*. A random 1 breaks the
symmetry, and the ring falls into a solution. A solution is a fixed point of
step 2, so the ring stays there until another random 1 knocks it out. The ring
then goes back to searching and may land on the other solution. With `p = 1`
every variable is forced to 1, and the ring is *fixed* at all-1.

The general algorithm has two failure probabilities. `p1` is the chance that a
1 -> 0 change fails, and `p2` is the chance that keeping a 0 fails. In this
circuit both come from the same bias current, so `p1 = p2 = p`. In both cases the
gate outputs 1 where the rule says 0, so the gate does not need to know the old
value of the variable.

## One variable: four gates, four phases

AQFP gates are clocked by an AC excitation in four phases, phi1 to phi4, each 90
degrees apart. A gate takes its state from its input when its phase is excited,
and it holds that state for half an excitation period. Data therefore moves one
gate per quarter period. One variable (`saps_cell`) is a chain of four gates, one
per phase:

| phase | gate | module | does |
|---|---|---|---|
| phi1 | buffer / splitter | `aqfp_buffer` | observes `x_i` and sends it to both neighbouring cells |
| phi2 | NOR | `aqfp_nor` | `X_i = NOR(obs_{i-1}, obs_{i+1})` |
| phi3 | buffer | `aqfp_buffer` | passes `X_i` on |
| phi4 | biased buffer | `stochastic_buffer` | passes a 1, turns a 0 into 1 with probability `p`; holds `x_i` |

The phi4 buffer feeds the phi1 buffer of the next period, so a full circuit
period is one search iteration. `saps_top` puts `N` cells on a ring. Each NOR
gate reads the phi1 buffers of the cells on its left and right. Larger problems
repeat the same cell.

In this model one clock cycle is one quarter period. `four_phase_excitation`
produces a one-hot `sw_en` that rotates through the four phases while `run` is
high. Every gate is a register loaded when its phase's `sw_en` bit is set.

## The bias current, as a digital code

The bias current `I_b` is the solver's only control, and it works through noise.
Its effect is carried by `saps_pkg::bias_t`:

- `init = 1` stands for a strongly negative `I_b`. Every phi4 buffer is pulled to
  0 whatever its input. Hold it for at least one iteration to start a search from
  all-0.
- `p_flip` stands for a positive `I_b`. The probability that a 0 at a phi4
  buffer comes out as 1 is `p_flip / 2^PROB_W`, with `PROB_W = 8`. The field is
  `PROB_W + 1` bits wide, so `p_flip = 256` means probability 1. That is the fixed
  all-1 state that a too-large bias current produces. `p_flip = 0` means zero
  bias current and a fully deterministic circuit.

Each phi4 buffer has its own `thermal_noise_source`, a 32-bit xorshift generator
(shifts 13, 17 and 5). Its seed is `SEED_BASE + i * 0x9E3779B9`, and it advances
once per phi4 switching. A buffer fluctuates when its 8-bit sample is below
`p_flip`. The `flipped` output of each cell reports that this happened in the
last iteration. Without it, a testbench could not check single iterations exactly
while the noise is on.

The physical link between bias current (in microamperes) and probability is not
modelled. In the fabricated circuit, about 18.4 uA gave the fastest search and
27.6 uA fixed the state. Here you choose `p` directly.

## Interface and timing of `saps_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | one cycle per excitation quarter period |
| `rst_n` | in | 1 | asynchronous reset; all gates go to 0 |
| `run` | in | 1 | excitation on; the phases advance only while it is high |
| `bias` | in | `bias_t` | `init` and `p_flip`, shared by all cells |
| `x` | out | N | variables; `x[i-1]` is `x_i` |
| `flipped` | out | N | the last update of `x_i` was a fluctuation from 0 to 1 |
| `iter_done` | out | 1 | one-cycle pulse when a new `x` becomes visible |
| `v_rz` | out | N | return-to-zero readout, `x_i` while phi4 is excited, otherwise 0 |
| `v_uv` | out | 16 x N | the same readout as an amplitude in microvolts |

Parameters: `N` (default 4) and `SEED_BASE`.

An iteration takes four cycles while `run` is high. `x` changes only at the clock
edge that ends the phi4 cycle, and `iter_done` is high in the cycle after that
edge. `bias` is sampled at the phi4 edge. A new value therefore applies to the
next variable update.

The readout models the dc-SQUIDs coupled to the phi4 buffers. A buffer carries
current only while it is excited, so the readout shows a pulse in each iteration
where `x_i = 1`. The pulse lasts two of the four cycles and returns to zero in
between. `dc_squid_readout` is a behavioural model of that analog part. Its
amplitude (`V_HIGH_UV`, 100 uV) is arbitrary.

## What the model does, measured

`tb/saps_top_tb.sv` repeats the characterisation sequence at `N = 4`. For each
bias setting it runs 200 sequences. Each sequence initialises to all-0 and then
runs 1000 iterations. The seeds are fixed, so the results below are reproducible:

| p | mean iterations to first solution | P(solution) at iteration 10 | share of iterations in a solution |
|---|---|---|---|
| 0 | never (deadlock) | 0 | 0 |
| 2/256 | 78 | 0.10 | 0.46 |
| 16/256 | 10.9 | 0.40 | 0.44 |
| 32/256 | 7.8 | 0.39 | 0.39 |
| 128/256 | 8.2 | 0.18 | 0.16 |
| 1 | never (fixed at all-1) | 0 | 0 |

At `p = 32/256` the two solutions (0,1,0,1) and (1,0,1,0) were occupied for 38879
and 38030 iterations. The testbench prints them as `x[3:0]`, so (1,0,1,0) shows as
`0101`. This matches the qualitative picture of the circuit:

- deadlock without bias;
- a fast search at moderate bias;
- both solutions reached from the same initial state, with similar frequency;
- a fixed all-1 state at too-high bias.

One quantitative difference stands out. In the fabricated circuit the
probability of being in a solution reached 0.5 in fewer than 10 iterations at the
best bias. This idealised model levels off near 0.4 to 0.45 at `N = 4`, whatever
`p` is chosen. The model uses independent, identical flip probabilities in every
buffer, and the real circuit does not: its gates differ from one another, and
its two solutions were visibly not equally likely. The model does not try to
reproduce that.

`tb/saps_ring_sizes_tb.sv` runs the same sequence with `N = 8`. With `p = 32/256`
it takes about 25 iterations on average to find the first solution. It visits all
ten solutions of the 8-ring. The same testbench also runs a 6-ring. From all-0 at
`p = 0` it checks ten iterations of strict all-0/all-1 alternation. At `p = 32/256`
it checks that the ring reaches both (1,0,1,0,1,0) and (0,1,0,0,1,0).

## Where this departs from the superconducting circuit

- **Noise.** Thermal noise is replaced by xorshift pseudo-random numbers, one
  generator per phi4 buffer. Individual runs depend on the seeds. With other
  seeds the statistics above should change only by sampling noise.
- **Bias.** The bias is a probability code, not a current. The current-to-probability
  curve of the real buffers is not modelled.
- **Gates.** Each gate is a register with an enable. The adiabatic switching, the
  inner construction of the NOR gate from AQFP cells, and the splitters are
  reduced to their logic function.
- **Reset.** The real circuit has no reset; it is initialised through negative
  bias. The model has an asynchronous reset to 0, so that simulation starts from
  a known state. Use `bias.init` for the initialisation the circuit itself uses.
- **Not modelled.** The energy figures (12 junctions per variable, about 0.3 nW
  per variable at 5 GHz) and the ramp of the excitation currents.
- **Not included.** The proposed generalisation to arbitrary 3-SAT is not part of
  this design. Its variable cell uses flip-flops, a majority gate and stochastic
  gates, but its wiring is not specified well enough to build it.

## Files

| file | content |
|---|---|
| `rtl/saps_pkg.sv` | `PROB_W`, `bias_t`, phase enum, `P_ALWAYS` |
| `rtl/four_phase_excitation.sv` | phase sequencer, excitation windows, iteration pulse |
| `rtl/aqfp_buffer.sv` | phase-clocked buffer/splitter |
| `rtl/aqfp_nor.sv` | phase-clocked NOR |
| `rtl/thermal_noise_source.sv` | xorshift random samples |
| `rtl/stochastic_buffer.sv` | biased phi4 buffer |
| `rtl/saps_cell.sv` | one variable: four gates and a noise source |
| `rtl/dc_squid_readout.sv` | behavioural readout model |
| `rtl/saps_top.sv` | ring of `N` cells, excitation, readouts |
| `tb/<module>_tb.sv` | self-checking testbench for each module |
| `tb/saps_ring_sizes_tb.sv` | the solver at `N = 8` and `N = 6` |

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself, with
a watchdog. The testbench of `saps_top` has these properties:

- it checks every iteration against the update rule, computed independently;
- it checks the four-cycle iteration period and the readout;
- it counts initialisation, deadlock, escape from deadlock, holding a solution,
  leaving it, the fixed state and fluctuations, and fails if any of them never
  occurs.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/saps_pkg.sv rtl/saps_top.sv \
        tb/saps_top_tb.sv --top-module saps_top_tb -o sim
    ./obj_dir/sim

The other modules are found through `-Irtl` by file name. The `N = 4` testbench
runs 4.8 million clock cycles in about 10 seconds. To change the problem size, set
`N` on `saps_top`. To change the noise resolution, change `PROB_W` in the package.
The ring and the cells follow from `N`. The checks in `saps_top_tb` that expect
exactly two solutions hold only for `N = 4`.
