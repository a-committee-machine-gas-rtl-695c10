# Committee-machine gas identification on a time-multiplexed FPGA

This is synthesizable SystemVerilog for an electronic nose. Eight tin-oxide gas sensors
(two chips of four, run at different temperatures) are sampled until their responses
settle. The settled readings are normalised and projected onto five principal
components. A committee of five classifiers then decides which of five combustible
gases is present: CO, H2, CH4, CO+H2 or CO+CH4. The five classifiers are
k-nearest-neighbour (KNN), multilayer perceptron (MLP), radial-basis-function network
(RBF), Gaussian mixture model (GMM) and probabilistic PCA (PPCA). Each classifier's
output becomes a confidence per class. The confidences are combined with weights
derived from each classifier's accuracy, and the class with the highest score wins.

The sensors take seconds to minutes to settle, so speed does not matter here, but the
whole chain is too large for one small FPGA. The design therefore runs as three
configurations, one after another, and the chip is reconfigured between them:

| Stage | Module | Work |
|---|---|---|
| 1 | `preproc_stage` | sampling, steady-state detection, city-block normalisation, PCA |
| 2 | `cm_stage` | KNN, MLP, RBF, GMM and PPCA in parallel |
| 3 | `ct_decision_stage` | confidence transforms, weighted vote, winner-takes-all, LEDs |

The paper this design follows is "A Committee Machine Gas Identification System Based
on Dynamically Reconfigurable FPGA". It gives the architecture of every unit. It does
not give word widths, trained values or approximation segments, and it gives only part
of the control. Those parts are this design's own, and each file's header says which is
which.

## How the three stages hand over

In this RTL all three stages exist at once in `gas_ident_top`. `reconf_ctrl` enables
one stage at a time, which is what reconfiguration achieves on the chip:

1. The active stage pulses `done`.
2. `reconf_ctrl` raises `cfg_req` and puts the next configuration's bit-file address on
   `cfg_addr`. Stage 1 uses address 0, stage 2 address 1, stage 3 address 2.
3. It waits for `cfg_done` from the configuration controller, then pulses the next
   stage's `start`.
4. After stage 3 it switches back to stage 1. A new cycle starts only while `run` is
   high.

On the board, the configuration controller is a CPLD that copies the bit file from a
SmartMedia card, which takes about 26 ms. The values that cross a reconfiguration (the
5-component pattern and the classifier results) would be parked in the board's SRAM.
Here they stay in the output registers of the stage that produced them. Put a
store/restore sequence around these registers if the stages are really split into
separate bitstreams. The SRAM, the CPLD, the card, the sensors, the analog multiplexer
and the ADC are outside this RTL.

## Stage 1: from sensor voltages to a 5-number pattern

**Sampling (`adc_if`).** An 8-channel analog multiplexer feeds one 12-bit serial ADC.
At a 20 MHz clock, each sensor takes 20 cycles, so the eight sensors are scanned at
1 MHz:

| cycle | action |
|---|---|
| 0 | `mux_en` high, `mux_addr` = sensor |
| 1–15 | `adc_cs_n` low, `adc_sclk_en` high: 3 leading zeros, then 12 data bits MSB first, sampled on the rising edge |
| 16 | `adc_cs_n` high (ADC output released), word presented with `sample_valid` |
| 17–19 | idle |

SCLK is the system clock gated by `adc_sclk_en`. Build the gate outside the core, for
example with an output DDR register.

**Steady-state detection (`ssd`).** Each new word of sensor *i* is compared with the
previous word of that sensor, kept in `RD[i]`.
- If the difference is larger than `THRESH` (4 LSB), the sensor is still moving and the
  word replaces `RD[i]`.
- Otherwise the word is the steady value. It goes to `RS[i]` and the sensor's switch
  closes (`steady[i]`).

`preproc_stage` scans every `SAMPLE_PERIOD` cycles (20,000,000, which is 1 s) until all
eight sensors are steady.

**Normalisation (`normalizer`).** An adder tree sums the eight steady values. One
bit-serial divider (`seq_divider`) then forms each share of the sum:
`RN[i] = floor(128·RS[i]/ΣRS)`, a Q1.7 fraction saturated at 127/128. This removes the
dependence on gas concentration and keeps the signature.

**PCA with distributed arithmetic (`pca`, `da_unit`).** This is the least obvious part
of the design. The projection is `z = x·T`, with 8 inputs and 5 outputs. It uses no
multipliers. Take one inner product `y = Σ A_k·B_k` with constant `A_k` and N-bit
two's-complement `B_k`:

- The inputs `B_k` are shifted out one bit per cycle, LSB first, all in parallel.
- The K bits of one weight position form a K-bit address into a ROM. Entry `a` holds
  the sum of the `A_k` whose bit is set in `a`.
- The ROM word is added to the partial result, which has been shifted right by one.
- In the last cycle the sign bits form the address, and the word is *subtracted*
  instead of added. This is how two's-complement weighting works, and it avoids a
  second ROM for the sign bits.

`da_unit` keeps N−1 guard bits below the partial result, so the right shifts drop
nothing. After N = 8 cycles, `y` is the exact integer inner product. A single 8-input
ROM would need 2^8 words. Splitting `x` and `T` into two halves of four rows gives
`z = x¹T¹ + x²T²`. Each principal component then needs two 4-input DA units (16-word,
10-bit ROMs) and one adder: ten DA units in all. The ROM contents are generated from
the coefficient inputs, so any trained matrix can be used. The sums are rescaled to
Q1.7 with saturation.

## Stage 2: five classifiers in parallel

All classifiers read the same pattern `x` (5 × Q1.7) and start together.

- **KNN (`knn`, K = 3).** The 220 stored patterns sit in a memory that is written
  through the `ld_*` port.
  - Pipeline: read, five subtractors, five squarers, adder tree. It delivers one squared
    distance per clock.
  - A three-comparator winner-takes-all keeps the three smallest distances in R1 ≤ R2 ≤
    R3. A distance below R1 shifts R1→R2→R3; one below R2 shifts R2→R3; one below R3
    replaces R3. Ties keep the earlier pattern.
  - Output: the one-hot labels of the three neighbours.
- **MLP (`mlp`).** Five inputs, six tanh hidden nodes, five outputs.
  - Layer 1: six 5-input DA units, bias added, then a piecewise-linear tanh (`lpf_tanh`)
    with slopes 1, 1/2 and 1/8 and saturation at ±1.
  - Layer 2: five 6-input DA units, fed bit-serially with the hidden outputs.
- **RBF (`rbf`, 13 Gaussian centres).** One subtractor, one squarer and one accumulator
  build `‖x − c_j‖²` one component per cycle.
  - σ_j² is a power of two, `2^sexp[j]`, so the division is a shift.
  - A piecewise-linear `exp(−u)` (`lpf_exp`) gives φ_j.
  - In the next five cycles φ_j is multiplied by `w[0..4][j]` into five accumulators,
    while the distance to the next centre is built. The same 5-step counter walks the
    five components and the five classes, so this unit needs NPC = NCLASS.
- **GMM and PPCA (`gmm`).** For each class the unit evaluates `Σ_j K_j·exp(−z_j)` over
  the mixture components, where `z_j = ‖(x−μ_j)ᵀG_j‖²`, `G_jᵀG_j = Σ_j⁻¹/2` and G_j is
  upper triangular. Each component takes 11 cycles:
  - 5 cycles in a serial-parallel vector-matrix multiplier: s_i enters serially and
    updates all y_c with c ≥ i at once;
  - 5 cycles of square-and-accumulate;
  - 1 cycle of exponential, multiply by K_j and accumulate.

  The GMM uses M = 2 components per class. PPCA is the same unit with its own
  parameters and M = 1.

## Stage 3: confidences and the weighted vote

- `ct_knn` turns the three neighbour labels into vote fractions 0, 1/3, 2/3 or 1, coded
  as 0, 85, 171 and 256 with 256 = 1.0.
- Four `ct_norm` units map the MLP, RBF, GMM and PPCA outputs to shares of their sum,
  `y_k/Σy`, using adders and one divider. Negative outputs count as 0.
- `decision` forms `S_k = Σ_i W_i·Cf_k(i)` and picks the highest score. Ties go to the
  lower class number.

The weights come from the rule `W_i = (P_i − P_worst)/(P_best − P_worst)`, applied to
the classifier accuracies on five principal components. The accuracies are KNN 87.7 %,
MLP 90.5 %, RBF 86.8 %, GMM 94.5 % and PPCA 84.1 %, which gives W = 89, 158, 66, 256
and 0 (256 = 1.0). The least accurate classifier gets weight 0 and has no vote. The
weights are parameters of `decision`. The winning class is registered on `class_idx`
and as one-hot on `led`.

## Number formats

| Quantity | Format |
|---|---|
| ADC word, RS | 12-bit unsigned |
| RN, principal components, centres, means | 8-bit two's complement, Q1.7 |
| PCA matrix | 8-bit Q1.7 |
| MLP and RBF weights, MLP biases | 8-bit Q3.5 |
| GMM/PPCA `G` | 12-bit, 6 fractional bits, upper triangle used |
| GMM/PPCA `K` | 16-bit unsigned; only ratios matter |
| RBF width exponent `sexp` | 4-bit signed, σ² = 2^sexp |
| tanh output | Q1.7; exp output ×256, saturated at 255 |
| classifier outputs | 32-bit signed (MLP 12, RBF 13, GMM 8 fractional bits) |
| confidences, vote weights | 9-bit unsigned, 256 = 1.0 |

The shared sizes and types are in `gas_pkg`.

## Latency (clock cycles from the start cycle to `done`)

| Unit | Cycles |
|---|---|
| one sensor / one scan | 20 / 160 |
| `normalizer` | 8 × 21 + 1 = 169 |
| `da_unit`, `pca` | 9, 10 |
| `mlp` | 19 |
| `rbf` | (13 + 1) × 5 + 1 = 71 |
| `gmm` (M = 2) / PPCA (M = 1) | 111 / 56 |
| `knn` | NPAT + 5 = 225 |
| `cm_stage` | 226 (the KNN dominates) |
| `ct_decision_stage` | 5 × 42 + 2 = 212 |

Stage 1 is dominated by the sampling period: a sensor needs at least two scans, so a
decision takes at least 1 s.

## Trained parameters

Every trained value is an input of `gas_ident_top`: `pca_t`, `mlp_*`, `rbf_*`,
`gmm_*`, `ppca_*`. The KNN reference set is written through `knn_ld_we/addr/pat/label`
before use. For a fixed product, tie these inputs to constants and the synthesis tool
folds them into ROMs. Any trained model can be used after quantising it to the formats
above.

Besides the class (`class_idx`, `led`, `result_valid`), the top brings out the
intermediate results for observation:
- the pattern and every classifier's raw output and confidences;
- the three nearest distances and the class scores;
- the per-sensor steady flags, the scan count of the current measurement and the
  sequencer's busy flag.

## Departures and open points

- The sizes the paper gives are used throughout: 8 sensors, 12-bit ADC, 20-cycle
  sampling, 5 components, K = 3, 6 MLP hidden nodes, 13 RBF centres, ten 16×10-bit DA
  ROMs for PCA, five classes.
- These choices are this design's own:
  - the fixed-point formats above;
  - the steady-state threshold of 4 LSB;
  - the 220-entry KNN memory;
  - M = 2 GMM components per class;
  - the tanh and exp segments;
  - the one-hot 5-bit labels;
  - the start/done handshakes and the reconfiguration request protocol.
- The MLP confidence uses the same sum-normalisation as the other classifiers, not a
  softmax.
- The whole system runs from one clock. Stage 1 needs the 20 MHz ADC timing, so run
  the design at 20 MHz or add a clock enable to the sampling controller for a faster
  system clock. The original board ran the system at 50 MHz and made a separate
  20 MHz ADC clock.
- The KNN reference patterns and all trained values are held in ROMs on the original
  board. Here they are a writable memory (KNN) and input ports (the rest), so one
  netlist serves any trained model.
- The alternative split for smaller devices, with the committee divided into two
  configurations (KNN, GMM, RBF, then MLP, PPCA), is not built. `reconf_ctrl` has
  three stages only.
- Other numbers of principal components (2–8) need changes to `gas_pkg`, and to `rbf`
  when NPC ≠ NCLASS.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing -Irtl -Itb rtl/gas_pkg.sv tb/tb_knn.sv --top-module tb_knn
./obj_dir/Vtb_knn
```

What the testbenches cover:
- Most testbenches compare their unit bit-exactly with a reference computed
  independently in the testbench, and check the latencies above.
- `tb_lpf_tanh` and `tb_lpf_exp` check the approximations against the real functions.
- `tb_gas_ident_top` runs five gases end to end with a 2000-cycle sampling period. It
  uses a sensor model (`tb/adc_model.sv`) and a configuration-controller model. It
  checks the pattern, the neighbours, the class and the LEDs, the stage order and the
  bit-file addresses. It also counts the reconfigurations, the rescans of unsettled
  sensors and the steady-state detections.
- `tb_gas_ident_full` runs one identification with every parameter at its default,
  including the 20,000,000-cycle sampling period. It takes about a minute in Verilator.
