# APAIM: an approximate parallel annealing Ising machine in SystemVerilog

This is a 64-spin Ising machine for constrained combinatorial problems such as
the traveling-salesman problem (TSP). A problem is written as an Ising energy

    H = - sum_{i<j} J_ij s_i s_j - sum_i (h_i/2) s_i ,     s_i in {-1, +1}

and the machine searches for a low-energy spin configuration by simulated
annealing. An n-city TSP needs N = n*n spins: spin (i,k) says "city i is visited
at position k". With 64 spins the machine takes 8-city tours.

Three ideas shape the hardware:

* **Parallel annealing on two layers.** Each spin has a replica, so there are a
  left and a right layer. In odd steps every left spin is updated at once,
  using local fields computed from the right layer. In even steps the roles
  swap. A self-interaction `omega` couples each spin to its replica. `omega`
  grows during the anneal, so the two layers end in the same state.
* **Delta-driven local fields.** The local field `lf_i = h_i/2 + sum_j J_ij s_j`
  is not recomputed. After a parallel update, only the spins that flipped are
  streamed, one at a time. For each one, every spin's local field unit adds
  `J_ij * (s_new - s_old) = -2 s_old J_ij`. A step therefore costs time
  proportional to the number of flips, not to N.
* **Approximate arithmetic.** Coefficients and fields are 16-bit floats
  (1 sign, 5 exponent, 10 mantissa bits). The significand adder in the local
  field units is a *lower-part-OR and truncated adder* (LOTA). This saves area
  and delay at a small cost in accuracy.

## Block structure

| Unit | Module | Count | Role |
|---|---|---|---|
| Controller | `apaim_ctrl` | 1 | 15-state FSM; issues a 12-bit instruction every cycle |
| Memory block | `apaim_mem` | 1 | J matrix. One read returns column j (J_0j … J_(N-1)j) to all LAUs at once |
| DDSS | `apaim_ddss` | 1 | Turns the flip flags into a stream of (index, old state) |
| LAU | `apaim_lau` | N | Local field accumulator. Keeps two fields, one per layer, and updates them with the approximate adder |
| SIGU | `apaim_sigu` | N | Self-interaction: `omega = 0` with probability p (dropout), else `c * omega0` |
| SUU | `apaim_suu` | N | Spin update: Metropolis test, flip flag, energy term |
| RNG | `apaim_rng` | N/2 | 32-bit xorshift. Each half feeds one spin |
| ASU | `apaim_asu` | 1 | Annealing schedule: step s, temperature T, dynamic offset dT, c, p |
| SOUU | `apaim_souu` | 1 | Sums the Ising energy of configurations and keeps the best one |
| Arithmetic | `fp16_add`, `lota_adder`, `apaim_pkg` | | fp16 adder with LOTA significand adder; fp16 multiply, compare and sign helpers |

`apaim_top` wires these together. Its parameters are `N` (64), `APPROX_L` (5)
and `APPROX_K` (3). With these defaults it is the 64-spin machine with LOTA-5&3
adders.

## One annealing step, cycle by cycle

The controller is a Moore machine that takes one state per clock. Each state
drives a fixed instruction word:

| bit | 11 | 10 | 9 | 8 | 7 | 6 | 5 | 4 | 3 | 2 | 1 | 0 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|
| field | mode | rst_dynamic | noflip | cs_update | se1 | se0 | write | read | ddss_en | lau_en | suu_en | step_add |

| State | Instruction | What happens |
|---|---|---|
| idle | `000000000000` | nothing; leaves on `wr_req` (memory write) or `start` (annealing) |
| memory write | `000000100000` | the host writes words; back to idle on `ready` |
| SUU enable | `000000000010` | all SUUs update the active layer in parallel. If `finish` or `!anneal_en`, go to waiting accumulation |
| step adding | `000001000000` | |
| step adding delay | `000001000001` | ASU: s+1, r^(s-1) times r; the active layer flips |
| DDSS enable 0 | `000010001000` | DDSS loads the flip flags; LAUs register `c*omega0` |
| DDSS enable 0 delay | `000110001000` | c, p and omega are updated. Branch: any flip → LAU enable, none → no flip |
| LAU enable | `110000010000` | memory read of column `idx`; dT cleared |
| LAU enable delay 1 | `110000010000` | |
| LAU enable delay 2 | `110000010100` | all LAUs add `-2 s_old J_i,idx` |
| DDSS enable 1 | `000000001000` | DDSS drops the processed spin |
| DDSS enable 1 delay | `000000001000` | Branch: spins left → LAU enable, else → SUU enable |
| no flip | `000011000000` | |
| no flip delay | `001011000000` | dT = dT + T_inc |
| waiting accumulation | `000000000000` | waits for the SOUU to finish its sum, then idle |

So a step with no flip takes 7 cycles, and a step with k flips takes 5 + 5k
cycles. The delay states hold an instruction for one more cycle so the status
signals are settled before a branch. Each unit's commit bit is high for exactly
one cycle. The DDSS acts only on the first cycle of `ddss_en`.

Two entries in the table are this design's own reading:

* Bit 0 (`step_add`) is set in the *step adding delay* state. A table that
  never raises it cannot advance the ASU.
* The status "no flipped spin left" is the signal `flip_pending = 0`.

The arrows of the state diagram are rebuilt from the state descriptions.

## Local fields and the approximate adder

Each LAU keeps `lf[0]`, used to update the left layer (a sum over right spins),
and `lf[1]`, the mirror image. A flip in the layer just updated changes the
field of the layer to be updated next. That is `lf[a_is_r]` after the step
counter has advanced.

The fp16 adder (`fp16_add`) works like this:

1. It aligns the smaller operand by shifting it right. The bits shifted out
   are dropped; there are no guard bits.
2. It adds or subtracts the 11-bit significands in a 12-bit `lota_adder`.
   Subtraction adds the one's complement plus a carry-in.
3. It normalises with a leading-zero shift and truncates.

Results below 2^-14 flush to zero. Exponent 31 is an ordinary exponent, and
results saturate instead of overflowing to infinity.

`lota_adder #(W, L, K)` splits the sum at bit L:

* bits ≥ L: exact addition;
* bits K … L-1: `a | b`;
* bits < K: 0 (truncated);
* carry into the exact part: `a[L-1] & b[L-1]` when L > K, otherwise none.

The three special cases are:

* `L = K = 0`: exact adder;
* `L = K = k`: truncated adder TruA-k;
* `K = 0`: lower-part-OR adder LOA-L.

In subtraction the OR part drops the carry-in, so an approximate difference of
nearly equal values can come out negative. The adder then negates it and flips
the sign.

Measured accuracy with random same-sign operands, LOTA-5&3:

* mean relative error ≈ -2.4·10⁻³. Truncation makes the result systematically
  small, so the sign is always negative.
* mean relative error distance ≈ 5·10⁻³.

Subtractions show no bias.

**Drift.** The fields are kept incrementally, so this bias builds up over a run.
In the 64-spin, 8-city runs with LOTA-5&3:

* after about 2,000 field updates, single fields have drifted by 2 to 4 from
  `h/2 + sum J s` (the testbench reports the maximum);
* with exact adders the drift stays near 0.1.

This affects solution quality (see Verification). Two remedies are not built:
re-initialising the fields now and then, or adding guard bits.

## Spin update

For the active layer A (B is the other layer), the SUU computes

    dE = 2 s_A (lf + omega s_B)

The spin flips when `exp(-dE/T) > u`, with u a uniform 16-bit random number.
This is evaluated as `dE < T * (-ln u)`, which avoids computing an exponential.

`-ln u` is approximated with a leading-zero count. If u has z leading zeros,
then u = 2^-(z+1) (1+f) and -log2 u ≈ (z+1) - f. The result is scaled by ln 2.
The measured flip rates are 0.39 at dE/T = 1 (ideal 0.37) and 0.13 at
dE/T = 2 (ideal 0.135).

A negative dE always flips. The SUU adder is exact; only the LAUs use the LOTA.

## Schedule and self-interaction

The ASU keeps the following values:

* **Step count:** s = 1 after start. The active layer is left for odd s and
  right for even s.
* **Temperature:** `T = (T0 + dT) * r^(s-1)`, where r^(s-1) is a running
  product.
* **Dynamic offset dT:** rises by `T_inc` after every step without a flip and
  is cleared when a spin flips. This lets a stuck system heat up again.
* **Momentum scaling factor c:** rises linearly by `c_inc` per step, up to 1.
* **Dropout rate p:** falls linearly by `p_dec` to 0.

Every step, each SIGU sets `omega_i = 0` with probability p, and otherwise
`omega_i = c * omega0_i`. The product `c * omega0_i` is formed in the LAU.
`omega0` is a per-spin constant written by the host.

## Solution update

The field `lf_A` that the SUUs use was produced by layer B. Therefore

    H(s_B) = -1/2 * sum_i (lf_A,i s_B,i + (h_i/2) s_B,i)

is the exact Ising energy of the layer-B configuration. The SUUs register
`lf_A,i * s_B,i` and `s_B,i`. The cycle after each spin update, the SOUU takes
a snapshot if it is idle, or skips it if busy. It then adds one term per cycle
(N cycles, using `h_i/2` written by the host) and keeps the configuration if
its energy is the lowest so far. The energy of the layer that the last step
updated is not scored.

## Loading a problem and running

1. Pulse `wr_req`; the controller enters memory write.
2. Write words with `wr_en`, `wr_sel`, `wr_row`, `wr_col` and `wr_data`:
   * `WR_J`: `J[row][col]`;
   * `WR_LF0`: the initial field `lf0[row] = h_row/2 + sum_j J_row,j s0_j` for
     the start configuration `init_sigma`;
   * `WR_OMEGA`: `omega0[row]`;
   * `WR_HHALF`: `h_row/2`.
3. Raise `ready`; the controller returns to idle.
4. Hold the schedule inputs (`t0`, `r`, `t_inc`, `c0`, `c_inc`, `p0`, `p_dec`,
   `s_max`) and `init_sigma` stable, and pulse `start`.

The machine runs until step `s_max`, waits for the SOUU and returns to idle.
`best_sigma` and `best_energy` then hold the result. Spin bit 1 means +1. `J`
is symmetric with a zero diagonal.

The TSP coefficients used by the testbenches come from the QUBO

    A sum_i (1 - sum_k x_ik)^2 + A sum_k (1 - sum_i x_ik)^2 + B sum_{i!=j,k} d_ij x_ik x_j,k+1

with x = (1+s)/2. This gives `J_ab = -Q_ab/4` and `h_a = -(q_a + sum_b Q_ab/2)`,
where Q are the pair coefficients and q the linear ones. The testbenches use
A = B = 1 and distances scaled to [0, 1]. `tb/apaim_tb_pkg.sv` computes these.

## Simulation

With plain Verilator (5.x), from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/apaim_pkg.sv tb/apaim_tb_pkg.sv tb/tb_apaim_full.sv \
      --top-module tb_apaim_full -Mdir obj_full
    ./obj_full/Vtb_apaim_full

The packages come first. Verilator finds the other modules through `-I`, by
file name. Swap in any other testbench. The 64-spin build takes about half a
minute, and the 300-step run takes under a second. The adder sweep holds eight
machines; it takes about three minutes to build and half a minute to run.
Every testbench ends with a line
`TB_RESULT checks=<n> failures=<m>`.

| Testbench | What it checks |
|---|---|
| `tb_lota_adder` | bit-exact LOTA-5&3, exact, TruA-4 and LOA-4 against a reference; TruA never overestimates; LOA error < 2^L |
| `tb_fp16_add` | hand-worked sums; error bounds of the exact and the LOTA adder; mean error |
| `tb_apaim_ctrl` | the instruction of every state; 7-cycle and 5+5k-cycle steps; memory write handshake; finish and `anneal_en` stops |
| `tb_apaim_lau` | hand-worked and random field updates within bound; the other layer untouched; `c*omega0` |
| `tb_apaim_sigu` | keep, dropout, hold, init; dropout frequency near p |
| `tb_apaim_suu` | deterministic flip cases; the omega term; flip rates near exp(-1) and exp(-2) |
| `tb_apaim_rng` | sequence against a reference xorshift |
| `tb_apaim_asu` | T, dT, c and p with exactly representable constants; finish |
| `tb_apaim_ddss` | every flipped spin once, lowest first, with its old state |
| `tb_apaim_mem` | column reads, one-cycle latency, writes outside the write state ignored |
| `tb_apaim_souu` | N-cycle sums; skipping while busy; lowest-energy selection |
| `tb_apaim_top` | 4-city TSP (N = 16, LOTA-5&3), end to end (see below) |
| `tb_apaim_full` | 8-city TSP at every default (N = 64, LOTA-5&3), 300 steps |
| `tb_apaim_tsp8_exact` | 8-city TSP, N = 64 with exact adders, 300 steps |
| `tb_apaim_adder_sweep` | 8-city TSP on eight 64-spin machines side by side, one per adder type; 4 problems of 300 steps each |

The three end-to-end testbenches check the following during the run:

* every step's cycle count;
* that each flipped spin is streamed once with the right J column;
* every LAU update against its error bound;
* the drift of all fields from `h/2 + sum J s`.

They also count each mechanism and fail if one never occurs: memory write,
no-flip steps with dT rising, dT reset, multi-flip steps, omega dropout, SOUU
improvement, a skipped snapshot, and the wait for the energy sum.

Results:

| Testbench | Best solution |
|---|---|
| `tb_apaim_top` (4 cities, LOTA-5&3) | valid tour, checked |
| `tb_apaim_tsp8_exact` (8 cities, exact adders) | valid tour, checked |
| `tb_apaim_full` (8 cities, LOTA-5&3) | not a valid tour with the schedules tried (T0 0.3–4, r 0.98–0.995, 300–1000 steps) |

The `tb_apaim_full` outcome is printed, not checked. The cause is the field
drift described above.

`tb_apaim_adder_sweep` compares the adder types on the same four problems. It
checks that every machine stops after `s_max` steps with a stored solution. With
exact adders it also checks that the stored energy equals the energy
recomputed from the stored spins, within fp16 truncation. It prints:

| Adder | Runs without a valid tour | Largest gap, stored vs recomputed energy |
|---|---|---|
| exact | 0 of 4 | 2.7 |
| TruA-3 | 4 of 4 | 20.6 |
| TruA-4 | 4 of 4 | 34.9 |
| LOA-4 | 3 of 4 | 9.3 |
| LOA-5 | 4 of 4 | 2.7 |
| LOA-6 | 4 of 4 | 3.9 |
| LOTA-4&3 | 4 of 4 | 5.1 |
| LOTA-5&3 | 4 of 4 | 2.7 |

Energies are around -230. The gap shows the second effect of drift. The
solution unit scores configurations with the drifted fields, so it can keep a
configuration whose true energy is not the lowest. Truncating adders, which are
always biased, drift the most.

## Where this design makes its own choices

The following are choices where a published description of the machine is
silent:

* the host write interface and address map, the initial-field load, and `init`;
* fp16 rounding, subnormal and overflow handling;
* the LOTA carry rule and how subtraction is handled;
* the exp/log approximation in the SUU;
* xorshift RNGs;
* linear c and p;
* the SOUU's serial sum and the energy pairing (`lf_A` with `s_B`);
* the DDSS lowest-first order;
* the decode of `se1`/`se0`: only `{se1,se0} = 10` is used, to register
  `c*omega0`.

dT, c and p are machine-wide values and sit in the ASU; the LAU computes only
the fields and `c*omega0`.

Not built:

* the Gamma-noise error injection, which is a software method for predicting
  adder errors;
* the comparison machine.

No synthesis results are given here. Area, power and delay depend on a
standard-cell flow that is not part of this RTL.
