# Modular reduction units for NTT butterflies on FPGAs

Polynomial multiplication in lattice-based homomorphic encryption runs on the
number-theoretic transform (NTT). The NTT is built from butterflies, and every
butterfly needs a modular multiplication `y*z mod q` with a 32- to 64-bit
modulus `q`. The multiplication is cheap on an FPGA's multiplier slices. The
reduction back below `q` is what drives the cost.

This RTL makes the reduction cheap by restricting the modulus. NTT-friendly
moduli already have the form `q = q_h * 2^omega + 1`. If `q_h` is also kept
short (a *Proth* modulus, `omega >= beta/2`), two things follow:

* **The Montgomery factor becomes -1.** For every word size `w <= omega`,
  `-q^-1 mod 2^w = -1`. So the Montgomery quotient of a word is just its
  negation, and no multiplication by a precomputed factor is needed.
* **`q_h * 2^omega = -1 (mod q)`.** So a high part can be folded into a low
  part with one short product. This is the idea behind K^2-RED.

If `q_h` is further limited to three or four signed binary digits (a
*Proth-l* modulus), every product by `q_h` or `q` is a sum of a few shifted
copies. The reduction then needs no multipliers at all.

The design has four reduction datapaths, a butterfly that can use any of
them, and a top that runs one butterfly per method side by side.

| unit | modulus form | result | multiplier slices (64-bit default) | latency |
|---|---|---|---|---|
| `wlm_mixed` | Proth, `q_h` <= 17 bits | `a*2^-beta mod q` | 3 products (26x17 tiling) | 5 |
| `k2red` | Proth, `q_h` = 26 bits | `a*2^-2omega mod q` | 6 products | 5 |
| `k2red_shift` | Proth-l | `a*2^-2omega mod q` | none (barrel shifters) | 5 (`PIPE_A`) / 3 (`PIPE_B`) |
| `mont_shift` | Proth-l | `a*2^-beta mod q` | none (barrel shifters) | 6 (`PIPE_A`) / 4 (`PIPE_B`) |

All units take a double-width operand `a < q^2` and return `b` in `[0, q)`.
They accept one operand per clock and never stall.

## Moduli

Let `beta` be the width of the modulus, `LOGQH` the width of `q_h`, and
`omega = beta - LOGQH`.

* **Proth:** `q = q_h * 2^omega + 1`, with `q_h < 2^LOGQH` and
  `omega >= beta/2`. At the defaults (`beta = 64`, `LOGQH = 17`) this gives
  `q = q_h * 2^47 + 1`. This supports NTTs up to `n = 2^46`, far more than
  needed.
* **Proth-3l:** `q = 2^(beta-1) + (2^l1 - 2^l2 + 2^l3) * 2^omega + 1`, with
  `0 <= l2 <= l1 < LOGQH-1` and `0 <= l3 < LOGQH-1`.
* **Proth-2l:** the same without the `2^l3` term.

For Proth-l moduli, `l1`, `l2` and `l3` are run-time inputs. Their width is
`clog2(LOGQH-1)` bits, so 4 bits for `LOGQH = 17` and 5 bits for
`LOGQH = 32`. `beta` and `LOGQH` are fixed at design time.

A wider `q_h` admits more primes but costs more. It means wider multiplier
operands, or a wider shift range for the barrel shifters.

The units never test whether `q` is prime. They are exact for any odd
modulus of the right form. Primality only matters for the NTT itself.

## The reduction datapaths

### `wlm_mixed`: two-word Montgomery with words sized for the multiplier

Word-level Montgomery removes `w` low bits of `t` per iteration:

```
t' = -t_l mod 2^w                     (the Montgomery quotient, since q' = -1)
c  = t'[w-1] | t_l[w-1]               (= 1 exactly when t_l != 0)
t  = (t >> w) + (q_h * t' << (omega - w)) + c
```

The sum is exact because `t_l + t'` is either 0 or `2^w`. The carry `c`
stands in for that term, so the low word is never added.

The unit uses two iterations of different widths, `W1 = min(26, omega)` and
`W0 = beta - W1`. The widths are chosen so the second product fits one
26x17 multiplier slice. At the defaults, the first iteration removes 38 bits
and the second removes 26:

```
t0'  = -a[37:0]                      c0 = t0'[37] | a[37]
t1   = a[127:38] + (q_h*t0'[37:26] << 35) + (q_h*t0'[25:0] << 9) + c0   (91 bits)
t1'  = -t1[25:0]                     c1 = t1'[25] | t1[25]
t2   = t1[90:26] + (q_h*t1' << 21) + c1                                 (65 bits, < 2q)
b    = t2 - q if that is not negative, else t2
```

That is three 17x26 products in total. A plain word-level Montgomery
reduction with `omega = 17` words would need eight.

Pipeline registers sit after:

1. the first partial products
2. `t1`
3. the second product
4. `t2`
5. `b`

For other sizes, the first word is cut into 26-bit tiles in the same way.
With `beta = 32` and `LOGQH = 15`, the words are 15 and 17 bits.

### `k2red`: K^2-RED with multipliers

Because `q_h*2^omega = -1 (mod q)`, writing `a = a_h*2^omega + a_l` gives
`q_h*a_l - a_h = q_h*a (mod q)`. The unit applies this twice:

```
t  = q_h*a_l - a_h             (signed, 2*beta-omega+2 = 92 bits)
t' = q_h*t_l - t_h             (t_h = t >>> omega, signed; t' is beta+2 = 66 bits)
b  = t' - q   if t' >= q
     t' + q   if t' < 0
     t'       otherwise
```

The result is `t' = q_h^2 * a = a * 2^-2omega (mod q)`, with `-q < t' < 2q`.

At the defaults (`LOGQH = 26`, `omega = 38`), the 38-bit low word is cut
into the 17-bit pieces `[16:0]`, `[33:17]` and `[37:34]`. Each piece is
multiplied by the whole 26-bit `q_h`, giving 3 products per step and 6 in
all. The subtracted term is added as its two's complement. When `t_h` is
negative it is sign-extended first.

The two-sided correction is needed: `t'` really does go negative when `t_l`
is tiny and `t_h` positive. The testbenches force this case.

Registers sit after the first partial products, `t`, the second partial
products, `t'` and `b`, for 5 cycles in all.

### `k2red_shift`: K^2-RED with barrel shifters

This unit has the same two steps as `k2red`. Each product by `q_h` becomes:

```
q_h*x = (x << (LOGQH-1)) + (x << l1) + (x << l3) - (x << l2)
```

The shift by `LOGQH-1` is fixed wiring. The shifts by `l1`, `l2` and `l3`
are barrel shifters: six for Proth-3l moduli, or four with `L3_EN = 0`
(Proth-2l).

`PIPE` selects one of two pipelines:

* `PIPE_B` computes each step's shifts and sum in one cycle, and registers
  `t`, `t'` and `b`: 3 cycles.
* `PIPE_A` also registers the shifted copies before each sum: 5 cycles.
  `PIPE_A` is the default, and it is faster.

### `mont_shift`: Montgomery with barrel shifters

For a Proth modulus with `2*omega >= beta`:

```
(q_h*2^omega + 1)(q_h*2^omega - 1) = -1 (mod 2^beta)
```

So the full-width Montgomery factor is `q' = q - 2`. For a Proth-l modulus,
both `q'` and `q` have four signed digits, and classic one-shot Montgomery
needs only shifts:

```
t   = q'*a_l mod 2^beta      = (a_l<<(beta-1)) + (a_l<<(l1+omega)) - (a_l<<(l2+omega)) + (a_l<<(l3+omega)) - a_l
t'  = q*t                    = (t<<(beta-1))   + (t<<(l1+omega))   - (t<<(l2+omega))   + (t<<(l3+omega))   + t
c   = t'[beta-1] | a_l[beta-1]
b'  = a_h + (t' >> beta) + c          (< 2q)
b   = b' - q if b' >= q, else b'
```

`PIPE_B`, the default, registers `t`, `t'`, `b'` and `b`: 4 cycles.
`PIPE_A` also registers the shifted copies: 6 cycles.

`a_h` and `a_l[beta-1]` travel through delay registers to the `b'` stage.

## Butterfly and top

`ct_butterfly` computes the Cooley-Tukey butterfly
`(x + y*z, x - y*z) mod q`. It contains:

* `int_mul`, a registered `beta x beta` product with a latency of 2;
* the reduction chosen by the `RED` parameter;
* a delay line for `x`;
* a registered modular add and subtract, each with one conditional
  correction by `q`.

Each reduction leaves a factor `2^-k` in its result: `k = beta` for
`wlm_mixed` and `mont_shift`, and `k = 2*omega` for the K^2-RED units. The
butterfly cancels this factor by expecting the twiddle **pre-scaled**:
`w = z * 2^k mod q`. Twiddle tables are precomputed anyway, so the
pre-scaling costs no hardware. The latency is
`MUL_LAT + red_latency(RED, PIPE) + 1`. At the defaults that is 8 cycles,
or 7 with `mont_shift`.

`modred_top` places four butterflies side by side, one per method. Each is
in its 64-bit configuration:

| lane | unit | configuration |
|---|---|---|
| 0 | `wlm_mixed` | `q_h` 17 bits |
| 1 | `k2red` | `q_h` 26 bits |
| 2 | `k2red_shift` | `q_h` 17 bits, Proth-3l, `PIPE_A` |
| 3 | `mont_shift` | `q_h` 17 bits, Proth-3l, `PIPE_B` |

The lanes are independent. Each has its own valid, coefficients, twiddle
and modulus, because each method needs a modulus of its own form. The lane
index equals the `red_kind_e` value in `modred_pkg`. The ports are packed
arrays indexed by lane. The two shift-add lanes also take their `l1..l3`
exponents on separate ports (`k2rs_l*` and `msh_l*`).

A full NTT core would wrap one such butterfly per processing element. This
RTL does not include that core: no coefficient or twiddle memories, no
address generation and no stage control.

## Interface conventions

* One clock, rising edge. `rst_n` is asynchronous and active low. It clears
  only the valid pipelines; data registers are not reset.
* Every unit has `in_valid` and `out_valid`. `out_valid` is `in_valid`
  delayed by the fixed latency. There is no back-pressure.
* `q`, and `l1..l3` for the shift-add units, are configuration inputs. They
  must stay constant while operands are in flight. To change the modulus,
  let the pipeline drain first.
* Operands must satisfy the input bound: `a < q^2`, or `a <= (q-1)^2` for
  the K^2-RED units. Products of two residues always do.
* `q` must match the design-time `LOGQH`, and for the shift-add units it
  must match `l1..l3`. The hardware does not check either.

## Files

| file | content |
|---|---|
| `rtl/modred_pkg.sv` | `red_kind_e` and `pipe_cfg_e` enums, multiplier-slice sizes, `red_latency()` and `red_exponent()` |
| `rtl/wlm_mixed.sv`, `rtl/k2red.sv`, `rtl/k2red_shift.sv`, `rtl/mont_shift.sv` | the four reduction units |
| `rtl/int_mul.sv` | pipelined integer multiplier |
| `rtl/ct_butterfly.sv` | butterfly with a selectable reduction |
| `rtl/modred_top.sv` | top: four butterfly lanes |
| `tb/modred_ref_pkg.sv` | reference arithmetic: `a*2^-k mod q` by `%` and repeated halving mod `q`, and random moduli of each form |
| `tb/red_harness.sv`, `tb/bf_harness.sv` | stream-and-check harnesses for one reduction unit or one butterfly |
| `tb/tb_<unit>.sv` | one self-checking testbench per module |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each also has a watchdog that counts a failure if the run hangs.
To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/modred_pkg.sv tb/modred_ref_pkg.sv tb/tb_modred_top.sv --top-module tb_modred_top
./obj_dir/Vtb_modred_top
```

Replace `tb_modred_top` with `tb_wlm_mixed`, `tb_k2red`, `tb_k2red_shift`,
`tb_mont_shift`, `tb_int_mul` or `tb_ct_butterfly` to run another testbench.
Each one runs in seconds.

**Reduction unit testbenches.** These stream hundreds of operands per
modulus, with random idle cycles, and check every result and its exact
latency. The corner cases include:

* `0` and `(q-1)^2`;
* operands with cleared low bits, which give carry `c = 0`;
* for K^2-RED, operands whose second step goes negative.

They cover these configurations:

| unit | configurations tested |
|---|---|
| `wlm_mixed` | 64/17 and 32/15 |
| `k2red` | 64/26, 64/32 and 32/16 |
| `k2red_shift`, `mont_shift` | both pipelines, Proth-2l and Proth-3l, 64/17, 64/32 and 32/15 |

**`tb_modred_top`.** This runs the top at its default sizes, all four lanes
at once, with three moduli per lane. It counts every mechanism of the
datapath and fails if any one never occurs:

* the final subtraction of `q`, both taken and skipped;
* the `+q` correction of a negative K^2-RED result;
* the wrap of the modular addition;
* the wrap of the modular subtraction.

**`tb_ntt_workload`.** This uses the top at its default sizes as the
butterfly engine for complete forward negacyclic NTTs. The testbench acts
as the coefficient memory and the controller.

For each lane it first finds a 64-bit prime of that lane's form, using a
Miller-Rabin test that is exact below `2^64`. It also finds a primitive
`2n`-th root of unity `psi`. It then transforms random polynomials of size
`n = 2^12`, `2^14` and `2^16` in the in-place Cooley-Tukey order, issuing
one butterfly per cycle. All four lanes run at the same time.

It checks two things:

* Every stage takes exactly `n/2 - 1 + latency` cycles.
* 32 sampled outputs per transform match a direct evaluation
  `a(psi^(2i+1))`. The outputs are in bit-reversed order.

One lane therefore needs about `log2(n) * (n/2 + latency)` cycles per
transform. With `n = 2^12` and a latency of 8, that is about 24,700 cycles.
A core with `P` lanes in parallel divides this by about `P`.

## Where this RTL departs from or adds to the method

* **Multiplying by the negated word.** In `wlm_mixed`, each iteration
  multiplies `q_h` by the negated word `t'`, not by `t_l`. This is what the
  Montgomery identity requires, and it is how the published two-iteration
  datapath is drawn.
* **K^2-RED correction.** `k2red` includes the final two-sided correction,
  so its output is fully reduced. The published datapath drawing leaves
  this step out. Its pipeline description still counts a register after it.
* **Twiddle pre-scaling.** The constant factor of the reductions is removed
  by pre-scaling the twiddle (see above). The butterfly needs no extra
  correction multiplier.
* **The design's own choices.** The integer multiplier is a plain product
  with a latency of 2. The add/sub stage of the butterfly and all
  handshakes and reset behaviour are likewise this design's own.
* **DSP mapping.** The reported DSP counts assume a specific mapping onto
  26x17 slices. This RTL expresses the products at that granularity, so the
  partial products are 17x26 at the defaults. The actual mapping is left to
  synthesis.
* **Not included.**
  - The NTT core around the butterflies.
  - The baseline word-level Montgomery unit with `omega = log n + 1` words.
  - Barrett, Plantard and one-shot Montgomery with general moduli. These are
    only comparison points for the method.
