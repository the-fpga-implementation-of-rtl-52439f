# Folded three-level Daubechies-4 wavelet transform on a QMF lattice

This is a one-dimensional discrete wavelet transform (DWT) that takes one
signed sample per clock. It produces three octaves of detail, W1, W2 and W3,
and the final approximation S3, using the Daubechies 4-tap filter pair.
An octave-tree DWT never needs more than one low-pass/high-pass pair of
results per input sample, whatever the number of levels. So the design
builds one filter pair and shares it among all levels. Level 1 uses half
of the clock cycles, level 2 a quarter and level 3 an eighth. One cycle in
eight is left idle.

The filter pair is built as a two-stage quadrature-mirror lattice, not as
two 4-tap FIR filters. This needs 4 multipliers instead of 8. Two small
register files feed the shared lattice:

* The **data format converter (DFC)** gives the lattice the right input
  pair for the level it works on. That pair is either two input samples
  or two earlier low-pass results of the level below.
* The **delay control unit (DCU)** holds the lattice's internal state
  separately for each level.

Each of them uses one register per level, not a delay line whose length
grows as 2^levels.

```
            +---------------------------------------------------------+
            |  low-pass S_j (fed back)                                |
            v                                                         |
 u_in --> [DFC] --xu--> [PE0: K1] --upper----------------> [PE1: K2] --+--> low_out  (S_j)
                 --xl-->           --lower--> [DCU] ------>           ----> high_out (W_j)
              ^                                 ^
              +------ level, second -- [dwt_ctrl: n mod 8]
```

## The lattice

Each processing element (`lattice_pe`) is a butterfly with a single
coefficient K:

```
yu = xu - K*xl
yl = xl + K*xu
```

PE0 uses K1 and PE1 uses K2. Between the two stages, the lower branch goes
through the DCU. For level j, the DCU returns the PE0 lower output from
the previous computation of that same level. Let x0 be the newest and x3
the oldest of four consecutive samples of that level's input. The two
outputs of PE1 are then:

```
low  (PE1 yl):  S = K2*x0 - K1*K2*x1 + K1*x2 + x3
high (PE1 yu):  W = x0 - K1*x1 - K1*K2*x2 - K2*x3
```

With K1 = -sqrt(3) and K2 = -(2+sqrt(3)), these are the Daubechies 4-tap
filters multiplied by -4(1+sqrt(3)) ≈ -10.93:

```
h = [(1+sqrt3), (3+sqrt3), (3-sqrt3), (1-sqrt3)] / 8        (low-pass, DC gain 1)
g = [(1-sqrt3), -(3-sqrt3), (3+sqrt3), -(1+sqrt3)] / 8      (high-pass)
```

Both outputs keep this gain; nothing divides it out. Each level makes the
word grow by about log2(12.9) ≈ 3.7 bits in the worst case: 12.9 is the sum
of the absolute lattice coefficients, 6 + 4·sqrt(3). That is why the
datapath is 20 bits wide while the input is 8 bits wide:
128 · 12.9³ ≈ 2.8·10⁵ < 2¹⁹.

Each PE combines two `coef_mult` instances (20-bit data × 8-bit
coefficient) with one adder and one subtractor. Both lattice stages and
the output logic are combinational. In each cycle, the path runs from the
DFC registers (or `u_in`), through two multiply-add levels, to the DFC and
DCU registers and the output registers.

## Schedule

`dwt_ctrl` counts n modulo 8. Level j is computed when the low j bits of n
equal 2^(j-1) - 1:

| n mod 8 | level | PE0 upper `xu` | PE0 lower `xl` | DCU reg read, then written | DFC register loaded with S at end of cycle |
|---|---|---|---|---|---|
| 0 | 1 | u(n)   | u(n-1) | R1 (value from n-2) | R1 (first of a level-1 pair) |
| 1 | 2 | S(n-1) | S(n-3) | R2 (value from n-4) | R1 (first of a level-2 pair) |
| 2 | 1 | u(n)   | u(n-1) | R1                  | R2 (second of a level-1 pair) |
| 3 | 3 | S(n-2) | S(n-6) | R3 (value from n-8) | none (S3 is a final output) |
| 4 | 1 | u(n)   | u(n-1) | R1                  | R1 |
| 5 | 2 | S(n-1) | S(n-3) | R2                  | R3 (second of a level-2 pair) |
| 6 | 1 | u(n)   | u(n-1) | R1                  | R2 |
| 7 | idle | 0   | 0      | none                | none |

Here S(m) is the low-pass result the lattice produced in cycle m. The
`second` signal is bit j of n during a level-j cycle. It tells the DFC
whether the result just computed is the first or the second of the two
results that the next level will consume:

* the first goes to the shared upper register R1, which is read in the
  very next cycle of the higher level;
* the second goes to that level's lower register, R2 or R3, which is read
  two higher-level computations later.

The two uses of R1 never overlap in this schedule. This is why the DFC
needs only R (a one-cycle delay of u), R1, R2 and R3, a total of four
20-bit words. A plain delay-line DFC needs 3·2^(j-2)+1 = 7 words, and a
delay-line DCU needs 2^j = 8 words where this one needs three.

The level count is fixed at 3 (`dwt_pkg::LEVELS`). The shared R1 is what
prevents a simple extension to 4 levels: the level-1 result at n = 16l+4
would overwrite the level-3 result that level 4 still needs at n = 16l+7.
A deeper version needs one upper register per level in the DFC.

## Number format

| quantity | format |
|---|---|
| input `u_in` | 8-bit two's complement, sign-extended |
| datapath, `low_out`, `high_out` | 20-bit two's complement |
| K1 | -55 / 32 = -1.71875 (Q3.5, 8 bits) |
| K2 | -119 / 32 = -3.71875 (Q3.5, 8 bits) |
| products | (x·K) >>> 5, i.e. truncated toward minus infinity, wrapped to 20 bits |

Five fractional bits is the most that still lets K2 fit in 8 signed bits.
Rounding the coefficients keeps the lattice structure, so the two filters
remain a valid QMF pair in form. The high-pass filter does, however, lose
its exact zero at DC: 1 - K1 - K2 - K1·K2 = 0.046 instead of 0. A constant
input of 127 therefore gives a small nonzero level-1 detail of 4 LSB,
against a low-pass result of -1379.
The products are truncated, which adds a small negative bias of at most
1 LSB per product.

## Interface and timing (`dwt_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | one input sample per rising edge |
| `rst_n` | in | 1 | synchronous, active low; clears all history and restarts at n = 0 |
| `u_in` | in | `IN_W` = 8 | sample u(n), signed |
| `out_valid` | out | 1 | a result is present |
| `out_level` | out | 2 | its level, 1..3 |
| `low_out` | out | 20 | S_j (low-pass); with `out_level` = 3 this is the final approximation S3 |
| `high_out` | out | 20 | W_j (high-pass detail) |

The first sample after reset is u(0), and the samples before it count as
zero. All outputs are registered: a result computed in cycle n appears
after the next clock edge. The k-th level-j result (k = 0, 1, …) comes from
cycle 2^j·k + 2^(j-1) - 1. Over any 8 cycles there are 4 level-1 results,
2 level-2 results and 1 level-3 result, and `out_valid` is low once. The
input cannot be stalled: there is no enable, and one sample is consumed
every cycle.

The k-th level-1 result uses u(2k), u(2k-1), u(2k-2) and u(2k-3), so the
filter phase is set by the first sample after reset. Level j+1 takes the
level-j low-pass results in the same way. Within each level the result
sequence is the usual decimated convolution,
S_j(k) = Σ_m S_{j-1}(2k-m)·f(m).

## Files

| file | contents |
|---|---|
| `rtl/dwt_pkg.sv` | widths, LEVELS, K1/K2, shared types |
| `rtl/coef_mult.sv` | 20×8 fixed-point coefficient multiplier |
| `rtl/lattice_pe.sv` | lattice butterfly, coefficient as parameter |
| `rtl/dwt_ctrl.sv` | counter n and level / `second` decoder |
| `rtl/dwt_dfc.sv` | data format converter (R, R1, R2, R3, two muxes) |
| `rtl/dwt_dcu.sv` | delay control unit (R1, R2, R3, mux) |
| `rtl/dwt_top.sv` | the whole transform |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Origin and departures

The design follows a published FPGA design of this transform. It keeps
that design's lattice factorisation and coefficients, its level schedule,
its timing equations for the DFC and DCU, the register-per-level
organisation of both units, and its 20-bit datapath with 8-bit
coefficients. The following points were not given by the source, were
ambiguous there, or differ from it:

* **Multiplier count.** The source speaks of three multipliers, but its
  lattice diagram shows four coefficient products, and the lattice needs
  four. This design has four.
* **Coefficient width.** The source states both 20×8 and 20×4. The design
  uses 8 bits, because 4 bits cannot represent K2 usefully. The Q3.5
  format, truncation and wrap-around are this design's choice.
* **Signs inside the butterflies.** They were chosen so that the two
  stages give exactly the low-pass and high-pass polynomials above.
  With that choice the low-pass result is the lower output of PE1, and
  that is the output fed back into the DFC.
* **DFC load instants.** They are derived from the DFC timing equations
  for a lattice that produces its result in the same cycle it is
  computed. The register-clock annotations in the source's DFC diagram
  disagree with those equations; the equations were followed.
* **Choices made here.** The input width (8 bits), the output registers
  with `out_valid`/`out_level`, the synchronous reset that clears all
  history, and zero outputs from the DFC/DCU in the idle slot.
* **No timing closure.** The source reports about 20 MHz on an Altera
  FLEX 10K device. This RTL has not been timed on any device. Its
  critical path is two 20×8 multiplies and two 20-bit additions in series.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a cycle
watchdog. `dwt_ctrl` and `dwt_top` also carry concurrent assertions:
exactly one idle slot per period, `second` only on levels 1 and 2, and
`out_valid` set exactly when `out_level` is nonzero. Run with `--assert`
to enable them.

* `coef_mult_tb`: edge and random operands against floor(x·k/32) in
  64-bit arithmetic, including worked examples.
* `lattice_pe_tb`: both coefficients, bit-exact against an integer model
  and within 1 LSB of the same expression in real arithmetic.
* `dwt_ctrl_tb`: the level and `second` pattern of the table above, the
  4/2/1/1 rate over 200 cycles, and reset in mid-period.
* `dwt_dcu_tb`: random data on every cycle, where each level-j read must
  return the value from exactly 2^j cycles earlier.
* `dwt_dfc_tb`: random input and random feedback on every cycle, with the
  outputs checked against the table above. A register that loads in the
  wrong cycle shows up immediately.
* `dwt_top_tb`: the full transform at default parameters. A 301-sample
  random run is cut off by a reset in the middle of the 8-cycle period,
  and a 2064-sample run follows it, which must start from cleared history:
  * the input mixes random data, a maximum-amplitude DC run, a full-scale
    alternating (Nyquist) run, an impulse, a ramp, and zeros at the end;
  * the reference model computes each level as a separate, unfolded
    lattice over the decimated sequence, bit-exact;
  * level-1 results are also compared with the ideal Daubechies filters in
    real arithmetic, within a bound derived from the coefficient rounding;
  * the test checks `out_valid`/`out_level` on every cycle, the number of
    results per level, and that every level, the idle slot, and results
    near full scale all occurred.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/dwt_pkg.sv rtl/coef_mult.sv rtl/lattice_pe.sv rtl/dwt_ctrl.sv \
  rtl/dwt_dfc.sv rtl/dwt_dcu.sv rtl/dwt_top.sv tb/dwt_top_tb.sv \
  --top-module dwt_top_tb -o sim
./obj_dir/sim
```

For the other testbenches, use the matching `tb/<module>_tb.sv` and
`--top-module`. `dwt_pkg.sv` must come first.

## Changing it

* **Coefficient precision.** Change `CW`, `CFRAC`, `K1` and `K2` in
  `dwt_pkg`. Keep K = round(K_exact · 2^CFRAC).
* **Input width.** Change `IN_W` on `dwt_top`. At three levels the worst
  case needs about IN_W + 11.1 bits of datapath, so keep `DW` in step.
* **Depth.** More levels need a per-level upper register in `dwt_dfc`
  (see Schedule). `dwt_ctrl` and `dwt_dcu` are already written as loops
  over `LEVELS`.
