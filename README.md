# Finite-set model predictive current control for a two-level inverter

A two-level, three-phase voltage source inverter (VSI) has only eight switching
states. A finite-set model predictive controller (FS-MPC) uses that fact: once
per sampling period it predicts, for every one of the eight states, where the
load current will be one period later. It scores each prediction by its
distance from the reference and applies the best state directly to the gates
for the whole next period. There is no PWM modulator and no PI loop. What
remains is arithmetic: eight small predict-and-score datapaths that run in
parallel, followed by a minimum search.

This repository holds synthesizable SystemVerilog for two versions of that
controller, which are alternatives for driving the same inverter:

* **`fsmpc_ab`** works in the stationary αβ frame. Its references are
  sinusoids.
* **`fsmpc_dq`** works in a frame that turns with the reference angle θ*. Its
  references are constants. In exchange it needs θ*, sin/cos of θ* (from a
  CORDIC), a rotation of the measured current and of all eight voltage
  vectors, and cross-coupling terms in the load model.

`fsmpc_top` places both controllers side by side behind one sampling timer.

The plant the defaults are built for has these values: DC link Vdc = 145 V,
RL load R = 10 Ω and L = 10 mH, sampling period Ts = 50 µs.

## The control law

The load obeys v = R·i + L·di/dt. With a forward-Euler step of Ts, the
prediction for candidate voltage v is:

```
alpha-beta:  i_a^p(k+1) = k1 i_a(k) + k2 v_a
             i_b^p(k+1) = k1 i_b(k) + k2 v_b
dq:          i_d^p(k+1) = k1 i_d(k) + k2 (v_d + k3 i_q(k))
             i_q^p(k+1) = k1 i_q(k) + k2 (v_q - k3 i_d(k))

k1 = 1 - R Ts / L = 0.95     k2 = Ts / L = 0.005 A/V     k3 = w* L = 3.1416 (50 Hz)
```

The cost of a candidate is the sum of absolute tracking errors. The reference
at k+1 is approximated by the reference at k, so no extrapolation is needed:

```
g = |i*_x - i_x^p| + |i*_y - i_y^p|      (x, y = alpha, beta  or  d, q)
```

The eight candidates are the states {Sa, Sb, Sc}. Here Sx = 1 means the upper
switch of leg x is on. Each state's voltage vector in αβ is
(Vdc/3·(2Sa − Sb − Sc), Vdc/√3·(Sb − Sc)):

| state | Sa Sb Sc | v_α      | v_β        | index |
|-------|----------|----------|------------|-------|
| S0    | 0 0 0    | 0        | 0          | 0     |
| S1    | 1 0 0    | 2Vdc/3   | 0          | 4     |
| S2    | 1 1 0    | Vdc/3    | √3·Vdc/3   | 6     |
| S3    | 0 1 0    | −Vdc/3   | √3·Vdc/3   | 2     |
| S4    | 0 1 1    | −2Vdc/3  | 0          | 3     |
| S5    | 0 0 1    | −Vdc/3   | −√3·Vdc/3  | 1     |
| S6    | 1 0 1    | Vdc/3    | −√3·Vdc/3  | 5     |
| S7    | 1 1 1    | 0        | 0          | 7     |

The *index number* is {Sa, Sb, Sc} read as a binary number. It comes out of
each controller so that the chosen state can be watched as one value.

The current transforms are:

* Clarke: x_α = x_a, x_β = (x_b − x_c)/√3.
* Park: x_d = cos θ*·x_α + sin θ*·x_β, x_q = −sin θ*·x_α + cos θ*·x_β.

## Hardware structure

```
                 alpha-beta controller (fsmpc_ab)

 sample ──┬──────────────────────────────────────────────┐
 i_a,b,c ─┴─ clarke ── 8 x predict_cost_ab ── min_select ── switch_gen ── gate[5:0], index, g_min
 i*_a,b ──── (latched at sample) ──┘   (v0..v7 constants)

                 dq controller (fsmpc_dq)

 sample ─┬─ theta_gen ── cordic_sincos ── cos,sin ─┬────────────────┐
 i_a,b,c ┴─ clarke ─────────────── park (current) ─┤                │
              v0..v7 constants ─── 8 x park (vectors)               │
                                          └─ 8 x predict_cost_dq ── min_select ── switch_gen
 i*_d,q ──── (latched at sample) ─────────────┘
```

| module | job | latency |
|---|---|---|
| `sample_timer` | strobe every `TS_CYCLES` clocks (5000 = 50 µs at 100 MHz) | – |
| `clarke` | abc → αβ | 1 |
| `theta_gen` | 32-bit phase accumulator; adds ω*·Ts per sample | – |
| `cordic_sincos` | iterative CORDIC, 16 rotations | ITER + 2 = 18 |
| `park` | αβ → dq (one for the current, one per voltage vector) | 1 |
| `predict_cost_ab` | eq. above and cost, one vector | 2 |
| `predict_cost_dq` | eq. above with k3 terms and cost, one vector | 3 |
| `cm_cell` | comparator plus 2:1 mux ("C&M") | comb. |
| `min_select` | tree of 7 C&M cells and 7 state muxes | 3 |
| `switch_gen` | S_opt → G1..G6, index, held for the period | 1 |

The total latency from `sample` to `done` is **7 cycles** for αβ and
**26 cycles** for dq. Both controllers assert this. The sampling period is
5000 cycles, so the whole evaluation takes less than 1 % of a period.

### Minimum search with a shadow state multiplexer

`min_select` is a balanced tree:

* The four first-level C&M cells compare (g0,g1), (g2,g3), (g4,g5) and
  (g6,g7).
* Two second-level cells compare the winners.
* One last cell produces g_min.

Each cell's select bit also drives a second, parallel tree of 2:1
multiplexers (M0..M6). That tree carries the 3-bit switching states S0..S7
in the same pairing, so S_opt follows the winning cost without an index
encoder. There is a register after each of the three levels.

A tie keeps the lower-numbered candidate. S0 and S7 are the same zero vector
and always tie, so S7 (index 7) is never applied. The zero vector is always
produced with the three lower switches on.

### Gate generation

`switch_gen` maps S_opt onto the gates:

* Upper switches: G1 = Sa, G3 = Sb, G5 = Sc.
* Lower switches: G2 = ¬Sa, G4 = ¬Sb, G6 = ¬Sc.

The gates are registered and held until the next result. `gate[0]` is G1 and
`gate[5]` is G6. Reset applies S0. No dead time is inserted: the gate
drivers or the isolation stage must add it. An assertion checks that the
two switches of a leg are never on together.

### The dq path in detail

At the strobe of sample k:

1. `theta_gen` still shows θ*(k) = k·ω*·Ts.
2. The CORDIC captures θ*(k) on that edge. The accumulator then moves on to
   θ*(k+1).
3. While the CORDIC iterates, the Clarke result is held.
4. When sin/cos are ready, nine Park units rotate the measured current and
   the eight constant voltage vectors in the same cycle.
5. The dq cost units then form the cross-coupling terms v_d + k3·i_q and
   v_q − k3·i_d. They floor these to the data format, multiply by k2 and add
   k1·i.

The CORDIC works on a 20-bit binary angle (2^20 = one turn):

* It folds the angle into ±¼ turn by removing half a turn and negating the
  result.
* It starts from (1/1.64676, 0), so its gain is already compensated.
* It carries 4 extra fraction bits through the 16 iterations, then rounds.

It is accurate to better than 8 LSB of Q2.16 (about 1.2·10⁻⁴).

## Number formats

All formats are in `fsmpc_pkg`:

| type | format | holds |
|---|---|---|
| `fx_t` | signed 18 bit, Q8.10 | currents (A), voltages (V); range ±128 |
| `coef_t` | signed 18 bit, Q4.14 | k1 = 15565, k2 = 82, k3 = 51472, 1/√3 |
| `trig_t` | signed 18 bit, Q2.16 | cos θ*, sin θ* |
| `cost_t` | unsigned 20 bit, 10 fraction bits | costs g, g_min |
| `angle_t` | unsigned 20 bit | θ* as a fraction of a turn |

Rounding and overflow:

* Products are summed at full width, floored to the data format, and
  saturated.
* The coefficients are rounded from real-valued expressions of Vdc, R, L, Ts
  and the reference frequency at elaboration time. Changing those constants
  in `fsmpc_pkg` changes the hardware. k2 = 82/16384 is 0.1 % above 0.005.
* All multipliers are 18 × 18 or smaller, so each fits one FPGA DSP slice.

## Interfaces

`fsmpc_top` has these ports (all data in the formats above):

* `clk` and `rst_n` (asynchronous reset, active low).
* `sample`: the sampling strobe.
* αβ controller:
  * inputs: `ab_i_a/b/c` (phase currents) and `ab_ref_alpha/beta` (i*(k)).
  * outputs: `ab_gate`, `ab_index`, `ab_g_min` and `ab_done`.
* dq controller:
  * inputs: `dq_i_a/b/c` and `dq_ref_d/q`.
  * outputs: `dq_gate`, `dq_index`, `dq_g_min`, `dq_done` and `dq_theta`.

The phase currents must be valid in the cycle in which `sample` is high.
The references are captured at the same moment. The outputs are stable from
`*_done` until the next result.

Things outside this RTL:

* **Current measurement.** The original setup measured two line currents
  through hall sensors, level shifters and an SPI ADC module. Converting the
  ADC codes to Q8.10 amperes, and deriving i_c = −i_a − i_b if only two
  phases are measured, is left to the integrator.
* **Outputs for recording.** g_min and the index number are useful to watch
  on a DAC.
* **The αβ references.** A sinusoid generator for them is not included. The
  dq controller needs only constants.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog.

* The unit testbenches compare against floating-point models with tolerances
  set by the fixed-point formats. They also check every latency listed
  above.
* `tb_fsmpc_ab` and `tb_fsmpc_dq` drive random currents and references. For
  each sample, they check that the applied state is optimal under a
  floating-point model of the cost, within rounding on near-ties.
* `tb_fsmpc_top` closes the loop at **default parameters**:
  * Each controller drives its own exact-discretised model of the inverter
    and RL load.
  * The reference is 50 Hz, stepped from 2.5 A to 4 A at 0.062 s and back at
    0.14 s. The run lasts 0.2 s: 4000 samples, 20 million cycles, under a
    minute in Verilator.
  * It checks optimality every sample, tracking error, the g_min spike and
    settling at each step, and that every distinct state is used.

`tb_fsmpc_top` prints these results:

| | αβ | dq | published simulation αβ / dq |
|---|---|---|---|
| g_min spike at 2.5 → 4 A | 1.79 A | 1.59 A | 1.76 / 1.16 A |
| g_min spike at 4 → 2.5 A | 0.88 A | 0.92 A | 1.02 / 0.8 A |
| settling after first step | 200 µs | 200 µs | 200 / 250 µs |
| THD of i_a at 2.5 A | 5.6 % | 7.2 % | 5.28 / 5.61 % |
| THD of i_a at 4 A | 4.1 % | 3.9 % | 3.54 / 3.74 % |
| average switching frequency (whole run) | 3.7 kHz | 3.7 kHz | 3.1–3.9 kHz |

Three things limit how far these numbers compare:

* The plant model is ideal.
* THD is taken over two cycles of the sampled current only.
* The switching frequency is averaged over both current levels.

The spike after the 4 → 2.5 A step is lower in this RTL than in the
published αβ result.

### Running a testbench

With plain Verilator 5, from the repository root:

```
verilator --binary --timing --assert -y rtl -y tb rtl/fsmpc_pkg.sv tb/tb_fsmpc_top.sv \
          --top-module tb_fsmpc_top -o sim && ./obj_dir/sim
```

To run any other testbench, replace `tb_fsmpc_top` with its name. The design
resets or initialises every register it reads, so it does not depend on the
initial values of a two-state simulator.

## Departures and choices not fixed by the method

* **Word lengths, pipelining, handshake, reset values and the 100 MHz clock**
  are this design's choices. The method only specifies fixed-point
  arithmetic and a pipelined minimum search.
* **Reference frequency 50 Hz.** Its only effects are k3 and the θ* step.
* **Eight cost units**, one per state S0..S7, although S0 and S7 give the same
  prediction. This keeps the regular 8-input tree. A leaner variant would
  feed g0 to both tree inputs.
* **Constant voltage vectors.** They are computed from a fixed Vdc = 145 V.
  The DC link is not measured.
* **Three current inputs per controller.** The Clarke transform uses
  (i_b − i_c)/√3 as written, not −i_a − i_b.
* **Tie rule** (lower index wins), **reset state S0**, and **no dead time**.
* **Both controllers in one top**, for comparison. A real inverter would be
  driven by one of them. The αβ controller needs fewer resources: no CORDIC,
  no Park units, and 4 instead of 6 multipliers per candidate.
