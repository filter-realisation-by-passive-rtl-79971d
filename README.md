# LUD-leapfrog digital ladder filters

A doubly terminated LC ladder is the classic low-sensitivity filter. Near the
passband, its response is insensitive to small changes in its components. The
filters here keep that property in digital hardware. They simulate the ladder's
**nodal equations**, written in matrix form and then factored, instead of
realising the transfer function directly as cascaded biquads do. The factoring
uses an LU (more exactly U^T D U) decomposition of the ladder's symmetric
capacitance-plus-everything matrix, together with a leapfrog-style split of the
inductor matrix. The result is a regular, two-row signal-flow graph:

* an **upper line** of adders that computes the "current" variables X_1..X_n
  from left to right,
* a **lower line** that computes the node voltages V_1..V_n from right to left,
* vertical branches that connect them through two kinds of integrator,
* diagonal **inductor branches** between neighbouring nodes.

The RTL builds four variants of this structure for one example: a 7th-order
elliptic lowpass with about 0.1 dB passband ripple up to about 3.4 kHz and
about 82 dB stopband attenuation, at 32 kHz sampling. Each variant takes one
sample per clock cycle. As an option, M1 and M2 can instead run one
multiplier per coefficient over two cycles per sample, and M1 can also run
all its additions on three time-shared adders.

| module        | structure   | what differs |
|---------------|-------------|--------------|
| `ll_standard` | Standard LL | general multipliers on the upper and lower lines |
| `ll_m1`       | Type M1     | system scaled so the line branches are shifts by 2^-k; scale factors appear as multipliers per node |
| `ll_m2`       | Type M2     | same scaling; the inductor matrix is factored again as U_b^T D_b U_b |
| `ll_m3`       | Type M3     | same scaling; the inductor matrix is split as A_b D_b A_b^T + D_m, with one extra integrator per node |
| `ll_m1_serial` | Type M1, serial | the same filter with its 22 additions time-shared on three adders |
| `ll_filter_top` | all four in parallel | one input, four outputs, plus a `sel` multiplexer |

## The equations behind the structure

The prototype is a ladder with 4 nodes. Its nodal equation is
`(sC + Γ/s + G) V = J`. Here C, Γ (inverse inductance) and G are symmetric
tridiagonal 4x4 matrices. V = [v1, -v2, v3, -v4] is chosen so that every entry
is positive. The bilinear transform with T = 2 turns this into

    (A + Ψ Φ 4Γ + Ψ 2G) V = Ψ (1+z) J,      A = C + Γ + G
    Ψ = z^-1 / (1 - z^-1)   (delayed integrator)
    Φ = 1 / (1 - z^-1)      (delay-free integrator)

A is factored as `U^T D U`, with U unit upper bidiagonal and `U = I + U_offd`.
The factored equation can be evaluated without delay-free loops:

    X = -U_offd^T X - (Φ 4Γ + 2G) V + (1+z) J      (upper line, left to right)
    V =  Ψ D^-1 X   - U_offd V                     (lower line, right to left)

This needs two facts:

* **Every loop passes through a Ψ register.** V is computed only from the Ψ
  outputs (`ll_psi_integrator`, a plain accumulator register).
* **Each line is a chain.** X_i needs X_(i-1), and V_i needs V_(i+1).

The ideal input term (1+z)J is not causal. It is built as (1 + z^-1)J
(`ll_input_section`), which delays the whole response by one sample. The
inductor matrix is split along the ladder's inductors:
`4Γ = A_L diag(4/L_k) A_L^T`. Here A_L is the node-inductor incidence matrix,
which holds only ones. Each inductor then becomes one branch
`Y_k = Φ(b_k (V_k + V_(k+1)))` with b_k = -4/L_k, feeding the upper-line
adders of both of its nodes. The terminations become the gains d = -2g at the
first and last node.

### Standard LL (`ll_standard`)

This is the equations above, used directly:
`a_i = 1/D_i` and `c_i = -u_(i,i+1)`. The c_i are general numbers, so each line
is a serial chain of multiply-adds. The longest path per sample holds about
(m+1)/2 multiplications for filter order m. That limits the sampling rate as
the order grows.

### Scaling to powers of two (Types M1, M2, M3)

The two lines can be stripped of multipliers. Scale the system by a diagonal
matrix S:

    A_s = S A S,   B_s = S 4Γ S,   G_s = S 2G S,   V_s = S^-1 V

Choose S, node by node, so that every off-diagonal of the U_s in
`A_s = U_s^T D_s U_s` is a power of two. This is always possible, because A_s
is tridiagonal. The transfer function changes only by a constant, which an
output factor f_SC restores. In the example, the line branches become
**-2^-4, -2^-2 and -2^-3**: arithmetic right shifts by 4, 2 and 3 bits that are
subtracted. Once shift-and-add costs no more than an add, the longest path
holds a fixed number of multiplications (3 for M1 and M2, 2 for M3) whatever
the order. The variants differ only in how they build the scaled inductor
term B_s:

* **M1** keeps `B_s = S A_L 4D_L A_L^T S`. Each node voltage is multiplied by
  c_i = S_i before it enters the inductor branches. Each node's sum of
  branches is multiplied by c_i again before it joins the upper line. The
  terminations sit inside those products.
* **M2** factors `B_s = U_b^T D_b U_b`. U_b is 3x4 and unit upper bidiagonal.
  The c_k then sit on the diagonals: one from V_(k+1) into branch k, and one
  from branch k into node k+1.
* **M3** uses `B_s = A_b D_b A_b^T + D_m`, with all entries of A_b equal to
  one. It needs a fourth delay-free integrator per node for the diagonal
  remainder D_m (gain c_i). In exchange, no multiplier follows a shift chain.

### Why M3 behaves differently at DC

Written in the physical node voltages, every row of the ideal Γ sums to zero (a node feeds only inductors), so Γ is singular. The ladder
passes DC only because of this. If Γ were nonsingular, the response would have
a zero at ω = 0. Standard LL, M1 and M2 form their inductor term as a product
through a 3-wide (n-1) factor. That term can never have rank 4, whatever the
coefficient errors, so these three structures always pass DC exactly. In M3,
the sum `A_b D_b A_b^T + D_m` loses its singularity as soon as the
coefficients are rounded. M3 then has a zero at DC and a slow droop near it.
The testbenches show this:

* With full-precision coefficients, M3's step response drifts from -1.0 to
  -0.46 over 30,000 samples, while the other three hold -1.0.
* With 8-bit coefficients, M3's DC gain is -48 dB.
* With 4-bit coefficients, M3 is 4.6 dB down already at 100 Hz.

## Coefficients

All values below are those of the example filter (`ll_pkg`, functions
`coef_a`, `coef_b`, `coef_c`, `coef_d`, `coef_f`). They have 4 significant
digits.

| | a_1..a_4 | b_1..b_3 | c | d_1, d_2 | output |
|---|---|---|---|---|---|
| Standard | 0.2056 0.1420 0.1412 0.2070 | -0.9668 -1.045 -1.093 | -0.0850 -0.1509 -0.1201 | -2, -2 | x 2 |
| M1 | 0.5651 0.7219 0.2616 0.3541 | -0.9668 -1.045 -1.093 | 0.6032 0.4435 0.7347 0.7646 | -2, -2 | x 0.9225 |
| M2 | 0.8807 1.125 0.4078 0.5519 | -0.226 -0.131 -0.379 | 0.7352 1.657 1.041 | -0.4670, -0.7502 | x 0.5787 |
| M3 | 0.8911 1.138 0.4126 0.5583 | -0.1640 -0.2159 -0.3894 | -0.05907 0.1290 -0.1265 -0.01587 | -0.4615, -0.7416 | x 0.585 |

M3's c_1 = -0.05907 is the D_m entry that the scaled decomposition gives:
-(B_s,11 - B_s,12), with S_1 = sqrt(-d_1/2). The other three c values of M3
follow the same rule. The sign of the power-of-two branches follows from the
-U_offd terms of the equations. With the opposite sign, the structures do not
reproduce the ladder response.

The parameter `COEF_MANT` (on every filter and on the top) truncates every
coefficient, treated as a binary floating-point number, to that many mantissa
bits, always rounding down. This reproduces short coefficient wordlengths.
`COEF_MANT = 0` (the default) keeps each value to 2^-16. Powers of two and the
±2 gains are exact at any setting.

## Highpass mode

The parameter `HIGHPASS = 1` (on the top, every filter, both integrators and
the input section) replaces every delay z^-1 with -z^-1:

* the Ψ register takes -(acc + x),
* the Φ register stores -y,
* the input section forms J[n] - J[n-1].

Each structure then realises H(-z), which is the lowpass response mirrored
about fs/4. For the example, that is a highpass passing about 12.6 to 16 kHz at
32 kHz sampling. The structures cannot be turned into highpass filters
directly, because their (1 + z^-1) input has a zero at z = -1. The mirror
transformation avoids that problem while keeping the same coefficients and the
same sensitivity properties.

## Sharing the c multipliers (M1, M2)

In M1 every scale factor c_i appears twice per node: once on the lower line
(c_i V_i, which feeds the inductor branches) and once on the upper line (c_i
times the node sum). In M2 each c_k also appears twice: on V_(k+1) into
inductor branch k, and on the output of branch k into upper node k+1. The
parameter `SHARE_C = 1` (on `ll_m1`, `ll_m2` and the top) computes each pair
on one multiplier:

* In the cycle a sample is accepted, the multiplier forms the lower-line
  product. V depends only on the Ψ registers, so the product is already
  final; it is registered, and the output sample is taken from V_4 as usual.
* In the next cycle the multiplier forms the upper-line product from the
  registered lower products and the Φ outputs, and all delays advance.
* `in_ready` is low in that second cycle. A sample is therefore accepted at
  most every other cycle, and only when `in_valid` and `in_ready` are both
  high.

The numbers are bit-identical to `SHARE_C = 0`. With `SHARE_C = 0`,
`in_ready` is tied high. On the top, `in_ready` gates the sample into all four
filters, so Standard LL and M3 stay in step with M1 and M2.

Standard LL does not get this option. Its c_i products sit inside the two
serial chains themselves, so one multiplier shared between the chains closes
a combinational loop through its operand multiplexer, even though the loop is
never active in a given cycle. M3 has no identical pair to share.

## Time-shared adders for M1 (`ll_m1_serial`)

M1 performs 3m + 1 = 22 additions per sample. `ll_m1` gives each addition
its own adder. These additions are:

* the three lower-line steps and the three inductor-branch sums,
* the three Φ and four Ψ integrator updates,
* the four node sums and the four upper-line steps,
* the input J + J_prev.

`ll_m1_serial` runs the same arithmetic on a bank of three
adder/subtractors. A step counter walks through an 11-step schedule, written
out in the module header. In each step, every adder takes its operands from
registers or from the constant multipliers behind them, and its result is
written back to a register. The schedule is as short as the data allow.
Eleven additions depend on each other in a chain:

* the lower line, V_3, V_2, V_1,
* inductor branch 1 and node sum 1,
* the upper line, X_1 to X_4,
* the last Ψ update.

No step needs more than three adders.

A sample is accepted when `in_ready` is high. `in_ready` then stays low for
the 11 steps, so the sample period is 12 clock cycles. The output is
bit-identical to `ll_m1`. The Φ registers double as the branch outputs Y_k,
and the Ψ updates run as soon as each X_i is known. Only the lowpass form is
provided.

On the top, `M1_SERIAL = 1` puts `ll_m1_serial` in place of `ll_m1`. The other
three filters then follow its `in_ready`.

## Number formats and timing (this design's choices)

* Ports: signed Q1.15 samples (`DATA_W = 16`). The output is truncated and
  saturated to the same format.
* Inside: 32-bit two's complement with 20 fraction bits (`INT_W`, `FRAC` in
  `ll_pkg`), so there are 11 integer bits of headroom. Every product is
  truncated to 20 fraction bits. Integrator overflow wraps.
* Coefficients: 20-bit signed with 16 fraction bits.
* One sample per clock cycle in which `in_valid` (and `in_ready`) is high.
  Idle cycles are allowed, and all delays hold during them. The whole signal-flow graph is
  evaluated in that one cycle. The output is V_4 computed from the integrator
  state before the new sample enters, scaled, and registered.
* `out_valid` follows the accepted sample by exactly one clock. Relative to the ideal
  bilinear ladder response, the output is one sample late, because of the
  causal (1 + z^-1) input.
* Reset is synchronous and active low, and clears every delay.

The combinational depth per cycle is the structure's critical path: the serial
upper and lower lines plus the branch multipliers. For a high clock rate, the
natural next step is pipelining, which is not done here. The multiplier
sharing and the serial M1 above are the only time-shared forms. Standard LL,
M2 and M3 always use one adder per addition.

Per filter, the register and coefficient counts are:

| structure | delays | coefficients |
|---|---|---|
| Standard LL, M1, M2 | 8 = m+1: 4 Ψ, 3 Φ, 1 input | 12, 13, 12 |
| M3 | 12 | 13 |

With `SHARE_C = 1`, M1 needs four fewer multipliers and M2 three fewer. In
exchange, each adds a register per shared product, plus one for the held
input sample and a busy flag.

## Files

* `rtl/ll_pkg.sv`: widths, `ll_type_e`, coefficient sets, `coef_fixed` /
  `coef_q` (coefficient truncation), `cmul` (constant multiply),
  `to_sample` / `from_sample`.
* `rtl/ll_psi_integrator.sv`, `rtl/ll_phi_integrator.sv`: the Ψ and Φ
  integrators.
* `rtl/ll_input_section.sv`: (1 + z^-1) and widening of the input.
* `rtl/ll_standard.sv`, `rtl/ll_m1.sv`, `rtl/ll_m2.sv`, `rtl/ll_m3.sv`: the
  four structures. Each file's header gives its node equations.
* `rtl/ll_m1_serial.sv`: M1 on three time-shared adders.
* `rtl/ll_filter_top.sv`: all four side by side.
* `tb/ll_ref_pkg.sv`: the floating-point reference. It solves the ladder's
  bilinear nodal equations directly (a tridiagonal solve per sample) and shares
  nothing with the filter structures.
* `tb/tb_*.sv`: self-checking testbenches. Each prints
  `TB_RESULT checks=N failures=M`.

## Verification

| testbench | what it checks |
|---|---|
| `tb_ll_standard`, `tb_ll_m1`, `tb_ll_m2`, `tb_ll_m3` | impulse, random-with-idle-cycles and step responses against the reference, plus the one-cycle latency |
| `tb_ll_filter_top` | all four at default parameters; see below |
| `tb_ll_wordlength` | gains at DC, 100 Hz, 1 kHz, 3 kHz and 8 kHz for 8-bit and 4-bit coefficients |
| `tb_ll_m1_serial` | `ll_m1_serial` against `ll_m1` fed the same accepted samples: bit-identical outputs, `in_ready` low for exactly 11 cycles, the reference, and the DC gain of a step |
| `tb_ll_shared` | `SHARE_C = 1` against a `SHARE_C = 0` top fed the same accepted samples: bit-identical outputs, the `in_ready` pattern, half-rate acceptance with `in_valid` held high, and M1/M2 against the reference |
| `tb_ll_highpass` | `HIGHPASS = 1`: random input against the mirrored reference (-1)^n H_lp((-1)^n x); passband gain at 13 and 15 kHz; stopband at 8 kHz and 100 Hz |
| `tb_ll_psi_integrator`, `tb_ll_phi_integrator`, `tb_ll_input_section`, `tb_ll_pkg` | the building blocks against integer and real models; the integrators and the input section in both lowpass and highpass modes |

The step test of the four single-filter testbenches is checked against the DC
gain worked out by hand from the nodal matrices (1.000). The worst errors
against the reference are:

* Standard LL and M1: about 2·10^-4 of full scale.
* M2: about 2·10^-2, because its coefficients are printed to only 3 digits.

`tb_ll_filter_top` does the following:

* Steps `sel` through all four structures and includes idle cycles.
* Drives a full-scale step whose overshoot saturates the outputs.
* Drives a 30,000-sample step. During it, Standard LL, M1 and M2 must hold the
  DC gain, and M3 must droop.
* Counts each of these events, and fails if one never happens.

Results of `tb_ll_wordlength`, in dB:

| structure | coefficients | DC | 100 Hz | 1 kHz | 3 kHz | 8 kHz |
|---|---|---|---|---|---|---|
| Standard LL | 8 bits | 0.00 | -0.00 | -0.09 | -0.10 | < -80 |
| M1 | 8 bits | 0.05 | 0.05 | -0.04 | -0.06 | < -80 |
| M2 | 8 bits | -0.24 | -0.25 | -0.33 | -0.34 | < -80 |
| M3 | 8 bits | -48 | -0.06 | -0.15 | -0.17 | < -80 |
| M1 | 4 bits | 0.32 | 0.31 | 0.10 | -0.04 | < -80 |
| M2 | 4 bits | -0.92 | -0.93 | -0.95 | -1.31 | < -80 |
| M3 | 4 bits | -78 | -4.6 | -0.48 | -0.55 | < -80 |

To simulate one testbench with plain Verilator:

    verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/ll_pkg.sv tb/ll_ref_pkg.sv \
        tb/tb_ll_filter_top.sv --top-module tb_ll_filter_top -o sim
    ./obj_dir/sim

Every testbench runs in well under a second.

## Changing the design

* **Another ladder of the same shape (4 nodes).** Replace the numbers in the
  `coef_*` functions of `ll_pkg`. For M1 to M3, also replace the shift amounts
  in `hshift()`.
* **A different order.** Change `N_NODES`, extend the coefficient functions,
  and extend the explicit coefficient lists (`KA`, `KB`, `KC`) in each filter.
  The node loops are written in terms of `N_NODES` and `N_IND`, but the first
  and last nodes, which carry the terminations, are written out.
* **Wider or narrower data.** Change `INT_W` / `FRAC` in `ll_pkg`. Keep enough
  integer bits for the internal nodes: in a ladder simulation, the internal
  node values can exceed the input level near the band edge.
* **Bandstop.** Bandstop designs do not fit this scheme. The (1 + z^-1)
  input has a zero at z = -1, so a bandstop filter, which must pass z = -1,
  would need an infinite gain there.
