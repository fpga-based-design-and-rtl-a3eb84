# Space vector modulator for a three-level NPC inverter

Each leg of a three-phase, three-level neutral-point-clamped (NPC) inverter
can connect its output to 0, vdc/2 or vdc. This gives 27 switching states,
and they map onto 19 distinct voltage vectors in the alpha-beta plane. Space
vector modulation (SVM) reproduces a rotating reference vector on average
over each switching period. It does this by dwelling on the three vectors
nearest to the reference for times that make the average equal to the
reference.

This RTL does the whole job in logic, with no processor. It has three
inputs:

- a clock;
- a reset;
- a two-bit selector for the switching frequency.

From these it generates the 50 Hz three-phase reference, picks the nearest
vectors, works out their dwell times and the switch sequence, and drives
the twelve gate signals of the inverter, with dead time inserted between
complementary switches.

## Top level

`svm_top_level` has these ports:

| port | dir | meaning |
|---|---|---|
| `clk` | in | system clock, 100 MHz by default (`CLK_HZ`) |
| `Reset` | in | synchronous, active high |
| `Choice[1:0]` | in | `00`: 1 kHz, `01`: 2 kHz, `10`/`11`: 5 kHz switching |
| `S1x`, `S2x` | out | outer and inner upper switch of leg x = a, b, c |
| `S1x_bar`, `S2x_bar` | out | their complements, which drive the lower switches S3x and S4x |

Parameters (defaults in brackets):

- `CLK_HZ` (100 000 000)
- `F_REF`, the reference frequency (50)
- `LUT_N`, sine table entries per reference period (1000)
- `AMP_Q14`, the reference amplitude as a fraction of vdc in Q14 (8192 = 0.5, i.e. 30 V on a 60 V bus)
- `DEAD_TIME_NS` (4000)

A leg's output level follows from its two upper switches:

| S1x | S2x | level |
|---|---|---|
| 0 | 0 | 0 |
| 0 | 1 | vdc/2 |
| 1 | 1 | vdc |

S1x on with S2x off is never produced, and an assertion in the top checks this.

## Data path

```
clock_divider -> sine_lut x3 -> abc_to_alphabeta -> sector_identification
                                                 -> triangle_identification
                                                 -> switching_time -> on_off_times
switching_frequency_select ----------------------------^                 |
                                      find_pulses <-----------------------+
                                           |
                                      dead_time x6 -> 12 gates
```

- **Reference generation**
  - `clock_divider` emits one tick every `CLK_HZ/(F_REF*LUT_N)` cycles, which is 2000 by default.
  - Each tick advances three `sine_lut` instances, with phases 0, -120 and -240 degrees.
  - Each table holds `round(AMP_Q14 * sin(2*pi*k/LUT_N + phase))` for k = 0..LUT_N-1. The table is computed at elaboration; it is not loaded from a file.
- **Sampling**
  - `find_pulses` runs a triangular up/down counter. At the start of each switching period it raises `period_start`.
  - That pulse samples the three references and the frequency choice into the pipeline.
- **Pipeline**
  - The pipeline has three registered stages:
    1. `abc_to_alphabeta`;
    2. `switching_time`, which takes the combinational sector and triangle along;
    3. `on_off_times`.
  - The result waits in `find_pulses` and is loaded at the next period boundary.
  - So the gates always realise the reference sampled one switching period earlier.
  - A change of `Choice` takes effect on a period boundary. The new period length and the times computed for it are always loaded together.
- **Pulses**
  - `find_pulses` compares the counter with six turn-on instants, giving one pulse per upper switch that is centred in the period.
  - Six `dead_time` cells split each ideal gate into a complementary pair.

## Number formats

- **Voltages** (`svm_pkg::fix_t`)
  - 18-bit two's complement with 14 fraction bits, as a fraction of vdc.
  - The transform is the power-invariant one:
    - v_alpha = sqrt(2/3)·(va - (vb+vc)/2)
    - v_beta = (vb - vc)/sqrt(2)
  - In these units the large vectors have length sqrt(2/3) ≈ 0.816.
  - The circle of linear operation has radius sqrt(1/2) ≈ 0.707.
  - The default reference has radius sqrt(3/2)·0.5 ≈ 0.612, so it stays inside that circle.
- **Times** (`cyc_t`)
  - Unsigned 17-bit clock counts, up to 131071.
  - The longest half period is 50000 cycles (1 kHz at 100 MHz).
- **Constants**
  - Irrational constants (sqrt 3, sqrt 6, sqrt 2, ...) are Q14 integers in `svm_pkg`.
  - `fmul` multiplies two Q14 values and rounds the product.

## Locating the reference: sector and triangle

Sector 1 covers 0..60 degrees and the sectors are numbered anticlockwise.

- **Sector** (`sector_identification`) is found without trigonometry, by comparing v_beta with ±sqrt(3)·v_alpha:
  - For v_beta ≥ 0: sector 1 if v_beta < sqrt3·v_alpha, sector 3 if v_beta < -sqrt3·v_alpha, otherwise sector 2.
  - For v_beta < 0: sector 4 if v_beta ≥ sqrt3·v_alpha, sector 6 if v_beta ≥ -sqrt3·v_alpha, otherwise sector 5.
- **Triangle** (`triangle_identification`): each sector splits into four triangles. Their corners are the zero vector, the small, medium and large vectors. In sector 1:
  - Triangle 1 is the inner triangle (zero, two small vectors).
  - Triangle 2 lies along the sector's first edge.
  - Triangle 4 lies along its second edge.
  - Triangle 3 is the middle one.
- Triangles 1, 2 and 4 are each tested with one or two linear inequalities per sector. For sector 1:
  - triangle 1: sqrt3·v_alpha + v_beta < sqrt(1/2)
  - triangle 2: sqrt3·v_alpha - v_beta > sqrt(1/2)
  - triangle 4: v_beta ≥ sqrt(1/8)
- Whatever fails all three tests is triangle 3.

## Dwell times

`switching_time` expresses the reference in the oblique 60-degree frame of its sector. Let P = sqrt6·v_alpha and Q = sqrt2·v_beta.

| sector | g | h |
|---|---|---|
| 1 | P - Q | 2Q |
| 2 | P + Q | Q - P |
| 3 | 2Q | -P - Q |
| 4 | Q - P | -2Q |
| 5 | -P - Q | P - Q |
| 6 | -2Q | P + Q |

In this frame the sector's small vectors sit at (1,0) and (0,1), and the large vectors at (2,0) and (0,2). The medium vector sits at (1,1). Solving the volt-second balance with the three corners of the triangle gives its dwell fractions, in units of the switching period:

| triangle | corners | t1 | t2 | t3 |
|---|---|---|---|---|
| 1 | zero, small1, small2 | 1-g-h | g | h |
| 2 | small1, large1, medium | 2-g-h | g-1 | h |
| 3 | small1, small2, medium | 1-h | 1-g | g+h-1 |
| 4 | small2, medium, large2 | 2-g-h | g | h-1 |

The corners are listed in the order of t1, t2, t3. In every triangle, t1 belongs to the corner whose redundant states open and close the sequence (next section). Each fraction is clamped to 0..1 and multiplied by the period length in cycles. A reference outside the hexagon is therefore not handled gracefully; there is no overmodulation mode.

## Switching sequence and turn-on instants

This is the least obvious part of the design (`on_off_times`).

The period is symmetric. The first half walks a chain of states in which each step raises one phase by one level. The second half walks the same chain back. A switching state is written as the levels of phases a, b, c. In sector 1 the chains are:

| triangle | chain | time per state in the first half |
|---|---|---|
| 1 | 000 100 110 111 211 221 222 | t1/6 t2/4 t3/4 t1/6 t2/4 t3/4 t1/6 |
| 2 | 100 200 210 211 | t1/4 t2/2 t3/2 t1/4 |
| 3 | 100 110 210 211 221 | t1/4 t2/4 t3/2 t1/4 t2/4 |
| 4 | 110 210 220 221 | t1/4 t2/2 t3/2 t1/4 |

A vector with two redundant states (the small vectors, e.g. 100 and 211) splits its time between them. The zero vector of triangle 1 splits its time over 000, 111 and 222. Every step between states changes one switch in one leg, so each switch changes state only twice per period.

For other sectors the chain is turned by (sector-1) steps of 60 degrees. One step maps state (a, b, c) to (2-b, 2-c, 2-a); the dwell times stay attached to the same positions in the chain. This replaces 24 stored sequence tables with one function.

Within a chain each phase's level only rises, or only falls after an odd number of turns. So each upper switch turns on at most once per half period:

- S1 is on at level 2.
- S2 is on at levels 1 and 2.

The turn-on instant of a switch, counted from the start of the period (where the chain begins), is the sum of the times of the states in which that switch is off. The block computes exactly this, for the six upper switches.

To keep rounding from leaving a gap, the last state in the chain takes whatever is left of the half period. A switch that is never on gets the value `half_period`, which the counter never reaches.

## Pulse generation

`find_pulses` counts 0 → H-1 → 0, where H is the half period (`50000`, `25000` or `10000` cycles). Each slope holds H counts, so 0 and H-1 each last two cycles and the period is exactly 2·H cycles.

- In the last cycle of the down slope it loads the next half period and the turn-on instants, and pulses `period_start`.
- The gate of each upper switch is registered `count >= t_on`. This gives a pulse centred on the top of the triangle, with a width of 2·(H - t_on) cycles.

## Dead time

Each `dead_time` cell turns an ideal gate into a pair (gate, gate_n).

- The side that must turn off does so at once.
- The other side turns on only after the input has been stable for `DT_CYCLES` cycles, which is 400 (4 µs) by default.
- A pulse shorter than the dead time is therefore swallowed.
- Both outputs are never high together; an assertion checks this.

`S1x_bar` and `S2x_bar` are the gate_n outputs.

## How this departs from the original design

The module split, the frequency selector mapping, the 100 MHz clock, the 50 Hz reference, the 30 V / 60 V operating point, the 4 µs dead time, the sector tree, the triangle inequalities and the symmetric switching sequences follow the original FPGA design. The following are this implementation's own:

- **Dwell-time formulas** are derived from the vector geometry, as in the table above. The published coefficient matrices leave out the constant terms that triangles 2, 3 and 4 need, and disagree with each other in places. The formulas used here were checked against a volt-second rebuild in the testbenches.
- **Sequences for sectors 2–6** are generated by rotating sector 1 rather than tabulated. They agree with the published sequences for the sectors that were cross-checked, which are sectors 2 and 4.
- **Number formats, pipeline registers, one-period latency, reset behaviour and the sine table size** (1000 entries) are not specified by the original and are chosen here.
- **Dead time** is a parameter (`DEAD_TIME_NS`), fixed at elaboration. It cannot be changed at run time.
- **Outside this RTL**: the gate-driver optocouplers, the power stage and the output connector are analog or passive hardware.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`. Build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/svm_pkg.sv tb/tb_svm_top_full.sv --top-module tb_svm_top_full
./obj_dir/Vtb_svm_top_full
```

Replace the name for any other testbench.

| testbench | what it checks |
|---|---|
| `tb_clock_divider`, `tb_sine_lut`, `tb_switching_frequency_select` | tick spacing, table values against `$sin`, Choice mapping |
| `tb_abc_to_alphabeta` | random three-phase inputs against a real-valued transform |
| `tb_sector_identification`, `tb_triangle_identification` | random vectors in every sector/triangle against an angle- and geometry-based model |
| `tb_switching_time` | dwell times against the model, and that the three corners weighted by the times reproduce the reference |
| `tb_on_off_times` | rebuilds the state chain from the six instants; checks one-level steps, the right corners and dwell per corner |
| `tb_find_pulses` | on-time, centring and period length per switching period, with inputs changing mid-period |
| `tb_dead_time` | exact gate/gate_n timing against a history model |
| `tb_svm_top_full` | the top at its default parameters, run at 1, 2 and 5 kHz |
| `tb_svm_top_level` | frequency changes, a mid-run reset and a smaller amplitude that reaches triangles 1 and 3 |

The two top-level benches use `svm_monitor`, which runs these checks every switching period:

- It decodes the leg levels from the gate outputs, ignoring dead-time intervals, and averages them over the period.
- It compares that average with the reference sampled one period earlier; the error must be within 1 % of vdc.
- It checks the period length for the selected frequency.
- It checks that no complementary pair is ever on together and that S1 is never on without S2.
- It checks that every dead time lasts exactly `DT_CYCLES`.
- It counts the sectors, triangles and frequencies visited.

On the default configuration, the three frequencies were run for 22 ms each. In that run, every switching period matched its reference to about 0.4 % of vdc.
