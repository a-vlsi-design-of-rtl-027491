# Arrayed pipelined Tomlinson-Harashima precoder (4x4 MU-MIMO)

A base station with four antennas that serves several users at once must
pre-distort what it sends, so that each user receives only its own stream.
Tomlinson-Harashima precoding (THP) does this with the channel's LQ
decomposition `H = L Q`, where `L` is lower triangular and `Q` is unitary:

1. **Interference cancellation (IC).** Stream `i` subtracts what streams
   `1..i-1` will leak into it, `x~_i = Mod(x_i - sum_j L_ij x~_j)`. Here
   `L_ij = l_ij / l_jj` and `x~_1 = x_1`. The modulo `Mod` folds each real
   and imaginary part back into `[-M, M)`, so the successive subtractions
   cannot make the transmit power grow.
2. **Weight multiplication (WCM).** The antenna samples are `x^ = Q^H x~`.
   The receiver of user `i` then sees `l_ii x~_i` plus noise. It divides by
   `l_ii` and applies the same fold to recover its symbol.

The decomposition changes only when new channel state arrives, roughly every
20 ms. The cancellation and weighting run at the symbol rate, one vector per
clock at 160 MHz for a 160 MHz 802.11ac channel. The design splits the two
accordingly:

* **LQD**: a small floating-point processor. It runs a Gram-Schmidt program
  once per subcarrier and also precomputes the six ratios `L_ij`, so the fast
  path needs no divider.
* **Coefficient memories**: one entry per subcarrier, 480 entries, holding
  the ratios and `Q^H` in 15-bit fixed point.
* **IC and WCM**: 15-bit fixed-point arrays with registers between the
  multiply-accumulate cells.

The arrayed IC/WCM pair, the 15-bit word, the processor's instruction set,
the two clock rates and the precomputation of the ratios follow the published architecture this
RTL implements. Fixed-point formats, rounding, memory organisation,
interfaces, the controller's hazard handling and the decomposition program
are this implementation's own choices. They are listed under
[Departures and own choices](#departures-and-own-choices).

## The staircase: how IC and WCM avoid a long path

Computed directly, `x~_4` needs `x~_3`, which needs `x~_2`, which needs
`x~_1`. That is three multiply-subtract-fold steps in one clock. The arrayed
IC breaks this chain with registers, so each row of the array finishes one
cycle after the row above:

```
cycle   t        t+1          t+2          t+3          t+4
IC in   x ─────► x~1, x~2     x~3          x~4
WCM              lane1 ────►  lane2 ────►  lane3 ────►  lane4 ──► x^ (reg)
```

* Row 2 (`thp_ic`) computes `x2 - L21 x1`, folds it and registers `x~2` at
  `t+1`.
* Rows 3 and 4 do their `L_i1` products in the first cycle and register the
  partial sums. In the next cycle they subtract `L32 x~2` and `L42 x~2`,
  using the registered `x~2`.
* Row 3 folds and delivers `x~3` at `t+2`. Row 4 registers once more,
  subtracts `L43 x~3`, folds, and delivers `x~4` at `t+3`.
* The coefficients needed later (`L32`, `L42` one cycle, `L43` two cycles)
  are delayed inside the unit. A new coefficient set can therefore go with
  every vector, and consecutive vectors may belong to different subcarriers.

The WCM (`thp_wcm`) is four rows of four complex multiply-add cells with a
register between cells. Cell `j` of every row uses `x~_j` in the cycle it
appears. Each row builds `sum_j w_ij x~_j` as the staircase passes, and the
four sums leave together from an output register. `w_ij` is entry `(i,j)` of
`Q^H`. Column `j` of the coefficients is delayed `j-1` cycles inside the
unit.

In the top level, lane 1 of the WCM takes `x1` directly, since `x~1 = x1`.
Lanes 2 to 4 come from the IC. The coefficient memories are read in the
cycle a vector arrives, so the top adds one cycle in front. Overall `x^`
leaves **five cycles after `x`**: one memory cycle, three staircase cycles
and one output register. Throughput is one vector per clock with no bubbles.

## Fixed-point datapath (IC, WCM)

| quantity | format | range |
|---|---|---|
| symbols `x`, `x~`, outputs `x^` | 15-bit two's complement, 10 fraction bits | ±16 |
| coefficients `L_ij`, `w_ij` | 15-bit, 11 fraction bits | ±8 |
| running sums inside a row | 19 bits (4 guard bits) | ±256 |
| modulo window `M` | 15-bit, same format as `x` | |
| `inv2m` = 1/(2M) | unsigned 15-bit, 14 fraction bits | |

* Each real product is rounded half-up to the sample format before it is
  accumulated (`thp_cmac`).
* `thp_mod` implements `Mod(v) = v - floor((v + M)/(2M)) * 2M` per part as
  add, multiply by the supplied reciprocal, floor by arithmetic shift,
  multiply by `2M` (a shift of `M`), and subtract. It is exact when `M` is a
  power of two, for example `M = 4` for 16-QAM with unit-spaced points.
  Other windows depend on the precision of `inv2m`.
* WCM outputs saturate to 15 bits. With a unitary `Q` and every part of
  `x~` within `±M`, each output part stays within `2·sqrt(2)·M`. The limit
  is therefore never reached for `M <= 4`.

## The decomposition processor (`lqd_asip`)

**Words and instructions.**

* The data memory holds 2048 words. Each word is one complex number: two
  IEEE-754 single-precision values, with the real part in bits `[63:32]`.
* An instruction is `{C[10:0], B[10:0], A[10:0], OP[7:0]}` (41 bits). It
  means: read words A and B, apply OP, and write the result to C.
* The instruction memory holds 512 words.

**Processing unit (`lqd_pu`).** A three-stage pipeline, one operation per
cycle with latency 3:

* Stage 1: four multipliers form `Ar·Br`, `Ai·Bi`, `Ar·Bi` and `Ai·Br`. The
  divider pair forms `Ar/Br` and `Ar/Bi`, and the square root forms
  `sqrt(Ar)`.
* Stage 2: two adder/subtractors combine the products, or the raw operands.
* Stage 3: two adders add the accumulator, for accumulative operations.
* The accumulator takes every result. It is forwarded from stage 3, so
  accumulative operations can follow each other in consecutive cycles.

| OP | operation | OP | operation |
|---|---|---|---|
| 0 | C = A + B | 12 | C = conj(A)·B |
| 1 | C = A − B | 13 | *Newton initialisation, not implemented* |
| 2 | C = A·B | 14 | C = conj(A) |
| 3 | C = A·Re(B) | 15 | C = A |
| 4 | C = acc + (A + B) | 16–19 | *CORDIC steps, not implemented* |
| 5 | C = acc + (A − B) | 20 | C = Re(A) + j·Re(B) |
| 6 | C = acc + A·B | 21 | C = Re(A) |
| 7 | C = acc + A·Re(B) | 22 | C = Im(A) |
| 8 | C = Re(A)/Re(B) + j·Re(A)/Im(B) | 23 | C = sign(Re A) + j·sign(Im A) |
| 9 | C = sqrt(Re(A)) | 24 | integer → float (both parts) |
| 10 | C = Re(A)Re(B) + Im(A)Im(B) | 25 | float → integer, toward zero, saturating |
| 11 | C = acc + Re(A)Re(B) + Im(A)Im(B) | | |

Codes 13 and 16–19, and anything above 25, write nothing and pulse
`illegal`.

**Floating-point units** (`fp_add`, `fp_mul`, `fp_div`, `fp_sqrt`) are
combinational:

* round toward zero;
* subnormal inputs and results become zero;
* overflow gives infinity;
* no NaNs are produced (`sqrt` of a negative number gives 0).

**Controller (`lqd_ctrl`).**

* It fetches in order (one cycle in the instruction memory), then reads A
  and B (one cycle in the two-port data memory), then issues to the unit.
  Results are written back three cycles later.
* An instruction waits at issue while A or B equals the destination of an
  instruction still in flight. Otherwise it issues one per cycle.
* The host starts a run with `start` and `prog_len`. `done` pulses when the
  last result is written, and `cycles` reports the run's length.
* The host can read and write both memories through `h_*` and `i_*` while
  the processor is idle.

**The program.** Gram-Schmidt over the rows `a_n` of `H`:

```
l_nk = sum_j a_nj conj(q_kj)  (k < n)
v_n  = a_n - sum_k l_nk q_k
l_nn = |v_n|,  q_n = v_n / l_nn
```

The program then computes the ratios `L_nk = l_nk / l_nn` and converts
`L_nk` and `w_ij = conj(q_ji)` to integers scaled by `2^11`. The program
(`tb/tb_lqd_prog_pkg.sv`) has 174 instructions.

A result can be read five instructions after the one that produces it;
closer than that, the controller waits. Written in plain order, the program
takes 310 cycles, because chains such as norm, square root, reciprocal and
scaling wait at every step. A list scheduler in the same package reorders
it to hide these waits, and the program then runs in **228 cycles per
matrix**, 274 µs for 480 subcarriers at 400 MHz. The scheduler respects
every read/write order on a data address and keeps each accumulation chain
in one piece. The published figure is 232.52 cycles per matrix.

**Coefficient loader (`thp_coef_loader`).** After each run it reads the 22
integer results (data words 128–133 and 144–159) through the host port. It
saturates them to 15 bits and writes them into the two coefficient memories
at the subcarrier the host named in `csi_sc`. This takes 23 cycles.

## Using the top level (`thp_top`)

The top has two clocks:

* `clk_lqd` drives the processor, the loader and the write ports of the
  coefficient memories. It is meant for 400 MHz.
* `clk` drives the read ports, IC and WCM. It is meant for 160 MHz, one
  symbol vector per cycle.

The coefficient memories are the only path between the two domains. Every
control port belongs to `clk_lqd` and every data port to `clk`. `rst_n` is
synchronous in both domains, so hold it for a few cycles of the slower
clock.

On the control side:

1. Write `H` (data words 0–15, row-major, as floats), the constants 1.0 at
   word 16 and 2048.0 at word 17, and the program through `h_*` and `i_*`.
2. Set `csi_sc` and pulse `lqd_start` for one cycle.
3. Wait for `lqd_busy` and then `coef_busy` to fall.
4. Repeat for every subcarrier. Do not touch `h_*` while either busy flag is
   high.

On the data side:

* Present `x_valid` with `x_sc`, the four complex symbols, `m` and `inv2m`,
  on any cycle.
* `xt_*` shows the IC outputs with their own valid flags, in staircase
  timing.
* `y_*` and `y_valid` give `x^` five `clk` cycles after the input.
* Do not precode a subcarrier while its coefficients are being rewritten.
  Its elements change one at a time, so it would mix old and new values.

## Departures and own choices

* **Decomposition program.** The program and its schedule are this
  design's own. It takes 228 cycles per matrix, against 232.52 published.
* **Missing instructions.** Newton initialisation (13) and the CORDIC
  operations (16–19) are not implemented, since only their names are known.
  The decomposition does not need them.
* **Operation semantics.** The table above gives each operation's exact
  operands and result. Where only the name was known, these are this
  design's choices. Division follows the unit's wiring (`Ar/Br`, `Ar/Bi`).
  The accumulator is loaded with every result.
* **Floating-point details.** Rounding toward zero, flush to zero and no
  NaNs are simplifications. The FPUs are not internally pipelined. The
  processing unit's three register stages are the only pipeline.
* **Fixed point.** The 15-bit word is the published one. The 10/11
  fraction-bit split, the guard bits, the rounding and the output saturation
  are this design's own.
* **Modulo window.** `M` and `1/(2M)` are inputs rather than constants, so
  one datapath serves several constellations.
* **Fold range.** The fold maps into `[-M, M)`, the half-open interval given
  by the floor formula.
* **Not built.** The conventional, register-free IC/WCM used only as a
  comparison point. The transmitter, radio channel and receivers.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog if
something hangs. With Verilator 5, from the directory that contains `rtl/`
and `tb/`:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/lqd_pkg.sv rtl/thp_pkg.sv tb/tb_fp_pkg.sv tb/tb_lqd_prog_pkg.sv \
  --top-module tb_thp_top tb/tb_thp_top.sv -o sim && obj_dir/sim
```

Replace `tb_thp_top` with any other testbench name.

| testbench | what it checks |
|---|---|
| `tb_thp_mod`, `tb_thp_cmac` | fold and multiply-accumulate against integer models |
| `tb_thp_ic`, `tb_thp_wcm` | bit-exact outputs and the per-lane cycle offsets |
| `tb_fp_*` | against the simulator's real arithmetic, within the truncation error |
| `tb_lqd_pu` | every implemented operation, latency 3, forwarding, illegal codes |
| `tb_lqd_dmem`, `tb_lqd_imem`, `tb_thp_coef_mem` | memories against array models |
| `tb_lqd_asip` | full decompositions against a double-precision Gram-Schmidt, plus cycle count |
| `tb_thp_coef_loader` | the 22 copies, saturation, duration |
| `tb_thp_top` | see below |

`tb_thp_top` runs with the top at its defaults:

* It decomposes all 480 subcarriers and checks the stored coefficients
  against a double-precision model.
* It then streams 4000 random 16-QAM vectors over random subcarriers and
  checks each output in three ways: bit-exact against a fixed-point model,
  exactly five cycles late, and decoded correctly after passing through
  `H`.
* It checks that the whole update, 480 decompositions and loads, takes
  less than 20 ms at 400 MHz. It measures 120,960 cycles, or 0.302 ms.
* It counts the mechanisms it exercised: processor hazard waits,
  back-to-back accumulations, modulo folds, subcarrier switches and idle
  cycles. It requires each to occur.

It finishes in about a second.
