# LFSR/SR: a pattern source for pseudo-deterministic BIST

Built-in self-test usually applies pseudo-random patterns from a linear
feedback shift register (LFSR). This works until a circuit has faults that
random patterns rarely hit. Those faults need particular deterministic
patterns. If you know in advance **at which step** the pattern generator will
produce a given pattern, you can choose seeds and test lengths so that one
pseudo-random run also delivers those patterns. This is *pseudo-deterministic
testing*.

Knowing the step is easy for a plain modular LFSR that feeds all inputs of a
block: it reduces to a discrete logarithm in GF(2^n). Real designs are
messier. A block's inputs come from several registers, and these registers
also feed other blocks. The apparatus here avoids that problem. The design's
own registers are chained into one long scan shift register, and its last
n registers are turned into a standard form (external-XOR) LFSR that drives
the chain. This is called an **LFSR/SR**. Each block under test simply taps
the chain wherever its input registers happen to be. A short chain of linear
algebra still predicts the step at which any tap group shows any pattern
(see below).

This RTL implements the apparatus with parameters: the standard form LFSR,
the scan chain, the complete LFSR/SR with any number of tapping
configurations, and the modular LFSR ("shift division circuit", SDC) used to
compute logarithms. The top level is a small worked example: ten registers,
a 4-stage driving LFSR and two 3-input blocks.

## Conventions

* A state or polynomial vector is written `[b0 b1 ... b(n-1)]`. In the RTL,
  **bit i holds b_i**. So the printed state `[0 0 0 1]` is `4'b1000`.
* The feedback polynomial is `p(x) = c0 + c1 x + ... + c(n-1) x^(n-1) + x^n`.
  It is passed as the n-bit vector `COEFF`, with bit i = c_i and the leading
  term implied. For example, `1 + x^3 + x^4` is `4'b1001`. For the method to
  work, `p(x)` must be primitive.
* Every block acts on the rising clock edge and does one *step* per cycle in
  which its `step` input is high. Its `load` input takes priority over `step`.
  Reset is synchronous and active low.

## The blocks

### `std_lfsr`: standard form LFSR

State `beta = [b0 .. b(n-1)]`. On each step every stage moves one place
toward stage 0, and stage n-1 takes `sum(c_i * b_i)`. In matrix form,
`beta <- beta*T`, where T is the companion matrix with `c` in its last
column. The serial output `sout` is stage 0. Started from `beta0`, it
produces the sequence `b0, b1, b2, ...` with `b(k+n) = sum c_i b(k+i)`.

### `sdc`: shift division circuit (modular form LFSR)

This is the same polynomial, realised with the XORs between the stages.
Each step computes `b0 <- c0*b(n-1)` and `bj <- b(j-1) + cj*b(n-1)`. Read
the state as the field element `b0 + b1*a + ... + b(n-1)*a^(n-1)`, where
`a` is a root of `p`. Then each step multiplies it by `a`. Started from `a`,
the circuit lists `a, a^2, a^3, ...`, so counting steps until a state
appears gives that state's discrete logarithm. In the example it builds the
whole logarithm table in 15 steps.

### `scan_sr`: the scan chain

This is the (N-n)-stage shift register in front of the LFSR. It shifts
toward stage 0 and takes its serial input, at stage `LEN-1`, from LFSR
stage 0. A parallel load carries the registers' normal data.

### `lfsr_sr`: the apparatus

```
 REG0  REG1  ...  REG(N-n-1) | REG(N-n) ... REG(N-1)
 <---- scan_sr (N-n) ------  | <---- std_lfsr (n) ---- feedback into REG(N-1)
```

* `test_mode = 0`: all N registers load `func_d`. These are the design's
  ordinary registers.
* `test_mode = 1`: `seed_load` writes `seed` into the LFSR part. The scan
  part holds, and its contents do not matter until the sequence reaches it.
  After that, `step` shifts the whole chain.
* Tapping configuration `s` has `L` taps. Tap j is register
  `TAP_BASE[s] + TAP_OFS[s][j]`, and `TAP_OFS[s]` is the configuration
  `tau = [i0 .. i(l-1)]`. The taps appear on `tap_q[s][j]`,
  combinationally. `stages` shows all registers, and `scan_out` is REG0.
* Elaboration fails if a tap lies beyond the chain. An assertion flags an
  all-zero seed, because an all-zero LFSR never leaves zero.

At step k (counted from the seed load), register j holds `b(k + j - (N-n))`
once `k >= N-n-j`. Configuration s therefore shows the pattern
`delta_m = [b(m+i0) .. b(m+i(l-1))]` at step `k = m + (N - n - TAP_BASE[s])`.

### `pdt_top`: the worked example

* Chain: ten registers. REG6..REG9 form the LFSR, with
  `p(x) = 1 + x^3 + x^4`.
* CLB1 inputs: REG2, REG4 and REG8. This is `tau = [0 2 6]` at base 2.
* CLB2 inputs: REG1, REG7 and REG8. This is `tau = [0 6 7]` at base 1.
* The blocks under test have no logic of their own here. Their input buses
  are the outputs `clb1_in` and `clb2_in`.
* The SDC with the same polynomial sits beside the chain, with its own
  `sdc_load`, `sdc_step` and `sdc_state` ports. It shares only clock and
  reset.
* Sizes and taps come from `pdt_pkg`.

## Predicting when a pattern appears

This is the part of the design that is easiest to get wrong, and it is what
the testbenches check. It takes three steps.

1. **Taps to LFSR state.** Let `gamma(i) = x^i mod p(x)`, read as an n-bit
   vector. Bit k of the LFSR state i steps ahead is a linear function of
   the state now: `b(k+i) = beta_k . gamma(i)`. Collect the columns
   `gamma(i_j)` into the n-by-l matrix C. Then the pattern at the taps is
   `delta = beta_k * C`. All 2^l patterns occur exactly when the columns of
   C are linearly independent, which needs `l <= n`. A given pattern then
   comes from `2^(n-l)` LFSR states `beta`, the solutions of
   `beta*C = delta`.
2. **Standard form to modular form.** Let A be the n-by-n matrix with
   `A[r][c] = c(r+c+1)`, where `c_n = 1` and the entry is 0 beyond that.
   Then `T*A = A*T^T`. So `sigma(beta) = beta*A` maps one step of
   `std_lfsr` onto one step of `sdc`, which is a multiplication by `a`.
3. **Logarithms.** Starting from seed `beta0`, state `beta` is reached after
   `log_a sigma(beta) - log_a sigma(beta0)` steps, modulo `2^n - 1`.
   Adding the tap's distance from the LFSR gives the step at which
   configuration s shows `delta`:

   `v = (N - n - TAP_BASE[s]) + (log sigma(beta) - log sigma(beta0)) mod (2^n - 1)`

   Do this for every `beta` in the solution set.

The example uses `N = 10`, `n = 4` and the seed `[0 0 0 1]`:

* `A = [0011; 0110; 1100; 1000]`.
* CLB1 wants `[1 1 1]`. Its solutions are `{[1011], [1110]}`, so the
  pattern appears at steps **12 and 8**.
* CLB2 wants `[0 1 0]`. Its solutions are `{[0111], [0001]}`, so the
  pattern appears at steps **7 and 5**.
* Seeding with `[0 1 1 1]` instead brings CLB2's pattern at step 5 and
  CLB1's at step 6, so a 7-step test covers both.

The hardware produces exactly these steps.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a cycle
watchdog. Reference values are computed inside the testbench from the
polynomial, independently of the RTL. None of these tests gives a cycle
count to check: the method counts only steps, and one step per enabled
clock cycle is this design's own timing.

| testbench | what it shows |
|---|---|
| `tb_std_lfsr` | State and serial output follow the recurrence. `sigma` turns every LFSR step into a multiplication by `a`. A matches the example's matrix. A 16-stage LFSR with `1 + x^11 + x^13 + x^14 + x^16` has period 65535. Load and hold are checked. |
| `tb_sdc` | The powers `a^1 .. a^15` match the example's logarithm table. An 8-stage SDC (`1 + x^2 + x^3 + x^4 + x^8`) matches polynomial arithmetic and has period 255. |
| `tb_scan_sr` | Random shifting with idle cycles, against a queue model. Parallel load is checked. |
| `tb_lfsr_sr` | The example chain in functional mode, then 25 steps from `[0 0 0 1]` with every register checked. Pattern steps match both the numbers above and an in-bench logarithm prediction. Over one period each tap group shows every non-zero 3-bit pattern twice and `[0 0 0]` once, as independent columns of C imply. Checks the `[0 1 1 1]` reseed. |
| `tb_lfsr_sr_n16` | A 40-stage chain driven by a 16-stage LFSR, with two 14-input tap groups. Checks that each group's columns are independent, then runs a full period of 65535 steps. Each random 14-bit pattern appears at exactly the 4 predicted steps. |
| `tb_pdt_top` | End to end at the default sizes. Builds the logarithm table from the hardware SDC, uses it to predict CLB1 and CLB2 pattern steps, runs a full period and a 7-step reseeded test, then returns to functional mode. It counts functional loads, mode switches, seed loads, shifts, SDC steps and pattern hits, and fails if any of them never happens. |

To simulate one testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_pdt_top rtl/pdt_pkg.sv tb/tb_pdt_top.sv
./obj_dir/Vtb_pdt_top
```

To lint a module: `verilator --lint-only -Wall -Irtl -y rtl rtl/pdt_pkg.sv rtl/lfsr_sr.sv`.
Expect warnings about unused constants of `pdt_pkg`. The package holds all
constants of the example, and each module uses only some of them.

## What follows the method and what is this design's own

The following come from the method and its example:

* the structure of both LFSR forms;
* the chain, with the LFSR at its head and arbitrary taps;
* the polynomial, sizes, tap positions and seeds of the example;
* all the numbers the testbenches check against.

The following are this design's own choices:

* **Register interface.** The `load`/`step` controls, the synchronous
  reset and the reset values: the example's seed `[0 0 0 1]` for the LFSR
  and the root `a` for the SDC.
* **Mode switching.** How the registers change between normal operation
  and the LFSR/SR: a `test_mode` select between a parallel functional load
  and shifting. The source only says that the registers are reconfigured
  into a scan chain with an LFSR at its head.
* **Seeding.** `seed_load` writes only the LFSR stages.
* **Tap description.** Taps are given as a base register plus offsets.
* **Range check.** The tap range check accepts any register of the chain,
  including the last.
* **Tables in the example.**
  * The printed step-by-step table of the example is only partly
    consistent. The columns of the scan-chain registers follow
    `p(x) = 1 + x^3 + x^4`, but those of the LFSR registers do not. The RTL
    follows the polynomial, which also gives the stated pattern steps.
  * CLB2's target pattern is `[0 1 0]`. This agrees with the solution set
    and the stated steps.

Not included:

* **The blocks under test.** They have no defined function, so their
  inputs are outputs of the top.
* **Choosing the primitive polynomial** so that every tap group has
  independent columns.
* **Computing logarithms for large n.** For `2^n - 1` with small prime
  factors this is done in software, and the SDC only stands in for small n.
* **Choosing seeds.**

These are offline calculations, not hardware. The testbenches implement the
prediction for checking purposes only.
