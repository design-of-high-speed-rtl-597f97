# Desensitized half-band FIR filter with Booth multipliers and square-root carry-select adders

This is a 16-bit half-band FIR filter built to be fast and small. It saves
area in two ways. The filter's form lets each coefficient serve two taps.
Every multiplication and every addition uses an arithmetic unit chosen for
a short carry path:

* the coefficient multipliers are **radix-4 modified Booth multipliers**;
* every adder (pre-adders, the accumulate row, the 1 + z^-1 sections and
  the adders inside the multipliers) is a **square-root carry-select adder
  (SQRT CSLA)**. Its carry-in-1 half is made by a binary to excess-1
  converter rather than a second ripple adder.

The filter is "desensitized" because its response is the product of a
folded symmetric filter and (1 + z^-1)^2. That factor puts a double zero
exactly at half the sample rate, whatever the coefficient values are, so
rounding the coefficients to 8 bits cannot move it. The same arithmetic
also serves a plain 3-tap, 8-bit direct-form FIR filter. A sequential
add/subtract-and-shift Booth multiplier is included as well.

The structure follows the article "Design of High-Speed Desensitized FIR
Filter Employing Reduced Complexity SQRT Carry Select Adder" (Manivannan,
Lakshminarasimman, Janaki Rani). The coefficient values, number formats,
output scaling, handshakes and reset are this implementation's own. They
are listed under "Choices made here".

## The desensitized filter (`desens_fir`)

### Transfer function

With NH = 4 coefficients H[0..3] and input x, the filter computes

    u(z) = 1/2 z^-8 + sum_{k=0..3} H[k] (z^-2k + z^-(16-2k))
    Y(z) = z^-1 (1 + z^-1)^2 u(z) X(z) / 2^9

In the time domain:

    u[j] = 64 x[j-8] + sum_k H[k] (x[j-2k] + x[j-16+2k])    (H in Q1.7, 1/2 = 64)
    y[m] = sat16( floor( (u[m-1] + 2 u[m-2] + u[m-3]) / 512 ) )

u is symmetric around its centre tap at delay 8. Only even delays carry
coefficients, and the centre gets the fixed weight 1/2. The divisor 512 is
128 for the Q1.7 coefficients times 4, the DC gain of (1 + z^-1)^2. The
impulse response is 19 samples long, from delay 1 to delay 19.

### Datapath

```
forward chain:    x[n] -z^-2- x[n-2] -z^-2- x[n-4] -z^-2- x[n-6] -z^-2- x[n-8]  (centre)
returning chain:  x[n-16] -z^-2- x[n-14] -z^-2- x[n-12] -z^-2- x[n-10] -z^-2- (from centre)

pre_k = x[n-2k] + x[n-16+2k]                       k = 0..3, one adder each
row   = H0*pre_0 + H1*pre_1 + H2*pre_2 + H3*pre_3  chain of four MAC units

row ----> Reg ----> 1+z^-1 ----------.
                                    (+) --> 1+z^-1 --> >>9, saturate --> Reg --> y
x[n-8] -> 1+z^-1 -> x1/2 -> Reg ----'
```

* **Delay line.** Sixteen registers hold x[n-1] .. x[n-16]. Together with
  the present input, they form a forward chain of four z^-2 stages that
  reaches the centre tap x[n-8]. From there, four more z^-2 stages run
  back. Pre-adder k adds forward tap 2k and returning tap 16-2k, which
  share coefficient H[k]. The pre-added sums are 17 bits wide.
* **MAC row.** Four `mac_unit`s in a chain each multiply one pre-added sum
  by its coefficient with a 17 x 8 modified Booth multiplier and add the
  product into the running sum. The sum is 27 bits wide and cannot
  overflow.
* **Sum path.** A register (`Reg`) is followed by a 1 + z^-1 section.
* **Centre path.** A 1 + z^-1 section, then the weight 1/2 (a left shift by
  COEF_FRAC-1), then a register. Both paths therefore carry one register
  and one z^-1 and stay aligned.
* **Output.** The two paths are added. A last 1 + z^-1 section follows, and
  the 30-bit full-precision result is shifted right by 9 (floor) and
  saturated to 16 bits. `ovf` marks a saturated output. The output is
  registered.

### Timing

* A sample is accepted on every rising clock edge with `in_valid` high.
  The filter can take one sample per clock.
* When `in_valid` is low, every register in the filter holds. The filter's
  state advances per sample, not per clock.
* `out_valid` is `in_valid` delayed by one clock. The `y` that appears with
  it belongs to the sample just taken.
* The combinational path runs from `x` through a pre-adder, the four MACs
  and into the sum register. This is the design's critical path. Nothing
  pipelines the MAC row: the source structure places the only register
  after it.
* Reset (`rst_n`, asynchronous, active low) clears the delay line and all
  section registers.

## Arithmetic units

### Square-root carry-select adder (`sqrt_csla`, `rc_csla_group`, `bec`)

An N-bit add is cut into groups of G = ceil(sqrt(N)) bits, so there are
about sqrt(N) groups. For 16 bits that is four groups of 4, and for 64 bits
eight groups of 8. The last group may be narrower.

* **Group adder** (`rc_csla_group`). Bit 0 is a full adder on the carry-in.
  Each higher bit has only a half adder, giving h = a ^ b and g = a & b.
  The sum bit is h ^ c and the next carry is g | (h & c).
* **Lowest group.** It adds with the real carry-in.
* **Every other group.** It adds with carry-in 0. The binary to excess-1
  converter (`bec`) turns that sum into the carry-in-1 sum: it flips each
  bit whose lower bits are all ones. Its carry out is the carry-in-0 carry
  OR "all ones". A multiplexer picks between the two sums and the two
  carry outs on the carry from the group below.

All groups work in parallel, so the delay is one group ripple plus one
multiplexer per group rather than N full-adder stages. The unit is
combinational and works at any N. The testbench checks 8, 16, 32 and
64 bits.

### Two's complement by conversion signal (`twos_comp`)

To negate a word, keep every bit up to and including the rightmost 1 and
invert every bit above it. The conversion signal of bit i is the OR of the
bits below i, and the result is `a ^ conv`. This needs no adder and no
"+1". The multipliers use it for their negative partial products.

### Radix-4 modified Booth multiplier (`booth_mult`)

The multiplier operand b is scanned in overlapping triples
{b[2j+1], b[2j], b[2j-1]}, with b[-1] = 0. An odd width is first
sign-extended by one bit. Each triple chooses a partial product:

| triple   | partial product |
|----------|-----------------|
| 000, 111 | 0               |
| 001, 010 | +a              |
| 011      | +2a             |
| 100      | -2a             |
| 101, 110 | -a              |

In the code, `dsp_pkg::booth_recode` does this selection and
`booth_sel_e` names the five choices. Other details:

* +2a is a one-bit shift.
* A negative choice passes the magnitude through `twos_comp`.
* Each partial product is sign-extended to the full product width
  (AW + BW) and shifted left by 2j.
* A chain of `sqrt_csla` adders sums the partial products.

An 8-bit coefficient therefore needs four partial products instead of
eight. The unit is combinational.

### Multiply-accumulate (`mac_unit`)

`y = c + a*b`: a `booth_mult` product, sign-extended to the accumulator
width CW and added to c by a `sqrt_csla`. Chaining MACs forms the
multiplier-adder row of both filters.

### 1 + z^-1 section (`one_plus_zinv`)

A register holds the previous accepted sample, and a `sqrt_csla` adds it to
the present one. The result is one bit wider than the input. The register
loads on `en`.

## The 3-tap direct-form filter (`fir_direct`)

`y[n] = h[0] x[n] + h[1] x[n-1] + h[2] x[n-2]`, with 8-bit signed samples
and 8-bit coefficients (default 32, 64, 32, that is 1/4, 1/2, 1/4 in Q1.7).
Two registers delay the input. Three `mac_unit`s form the sum at full
precision (18 bits), and the sum is registered. Its handshake matches the
desensitized filter: `in_valid` in, `out_valid` one clock later.

## The sequential Booth multiplier (`booth_seq`)

This is the textbook radix-2 Booth loop: A = 0, Q = multiplier, Q-1 = 0.
The loop runs N times:

* on {Q0, Q-1} = 10, A = A - M;
* on 01, A = A + M;
* then {A, Q, Q-1} shifts right arithmetically by one.

The product is {A, Q}. One step (add or subtract, then shift) runs per
clock. A has one guard bit, so M = -2^(N-1) works. -M is formed once at
start by `twos_comp`, and the add uses a `sqrt_csla`.

Handshake: `start` is taken while `busy` is low, and `a` and `b` are
sampled then. `busy` is high for N clocks. `done` pulses on the N-th edge
after the start edge, with `p` valid, and `p` holds until the next start.
An assertion checks that `done` and `busy` are never high together.

## Top level (`fir_top`)

The three units share `clk` and `rst_n` and nothing else:

| prefix | unit | ports |
|--------|------|-------|
| `ds_` | desensitized filter | `ds_in_valid`, `ds_x[15:0]`, `ds_out_valid`, `ds_y[15:0]`, `ds_ovf` |
| `df_` | direct-form filter | `df_in_valid`, `df_x[7:0]`, `df_out_valid`, `df_y[17:0]` |
| `bs_` | sequential multiplier | `bs_start`, `bs_a[15:0]`, `bs_b[15:0]`, `bs_busy`, `bs_done`, `bs_p[31:0]` |

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `desens_fir` | `DATA_W` | 16 | sample width |
| | `COEF_W` | 8 | coefficient width |
| | `COEF_FRAC` | 7 | fractional bits of the coefficients |
| | `OUT_W` | 16 | output width |
| | `NH` | 4 | coefficients (taps per delay chain) |
| | `H` | {-2, 6, -12, 40} | coefficients, H[0] for the outermost taps |
| `fir_direct` | `DATA_W`, `COEF_W`, `TAPS` | 8, 8, 3 | |
| | `H` | {32, 64, 32} | |
| `sqrt_csla` | `N` | 16 | adder width |
| `booth_mult` | `AW`, `BW` | 16, 8 | multiplicand and multiplier widths |
| `booth_seq` | `N` | 16 | operand width |

Internal widths in `desens_fir` follow from the parameters and keep full
precision up to the output shift. Changing `NH` changes the length of both
delay chains (4·NH registers) and moves the centre tap to delay 2·NH. The
output shift and the 1/2 weight both follow `COEF_FRAC`.

## Choices made here

These are not taken from the source structure:

* **Coefficients.** The source gives no values. The defaults
  {-2, 6, -12, 40} make 1/2 + 2·sum(H)/128 = 1, so the folded part u has
  unity DC gain. Replace them with a real design.
* **Centre weight.** The centre weight 1/2 comes from the half-band form
  H(z) = 1/2 z^-m + h(z^2). The block diagram shows no multiplier on that
  path, so the weight is a shift.
* **Number format and output.** Coefficients are Q1.7. The output is a
  floor shift by COEF_FRAC + 2 with saturation to 16 bits. No rounding is
  done.
* **Control.** The output register, the `in_valid`/`out_valid` sample
  strobe and the asynchronous active-low reset are this implementation's.
  So is the `booth_seq` handshake.
* **SQRT CSLA groups.** Groups are equal, of ceil(sqrt(N)) bits. The upper
  groups reuse the group adder with carry-in 0 and leave its further
  simplification to synthesis.
* **Booth multiplier.** Partial products are fully sign-extended and added
  in a linear chain of SQRT CSLAs, not a compressor tree.
* **No extra pipelining.** Neither filter has pipeline registers between
  the adders of its MAC row. The block diagrams draw none, so a
  direct-form adder chain of three (direct filter) or four (desensitized
  filter) MACs is one combinational path.
* **Timing figures.** Timing, area and power figures reported for the
  original FPGA implementation are not reproduced.

## Verification

Every module has a self-checking testbench in `tb/` that compares against
values computed independently in the testbench:

| testbench | what it covers |
|-----------|----------------|
| `rc_csla_group_tb`, `bec_tb`, `twos_comp_tb` | exhaustive over all inputs at two widths |
| `sqrt_csla_tb` | 8, 16, 32, 64 bits: full-length carry ripples, a carry from every bit position, random operands |
| `booth_mult_tb` | 8 x 8 exhaustive, 6 x 5 exhaustive (odd width), 17 x 8 random and extremes |
| `booth_seq_tb` | 4-bit exhaustive, 16-bit random and extremes, N-clock latency, `busy` during the operation |
| `mac_unit_tb`, `one_plus_zinv_tb` | random and extreme operands, clock enable |
| `desens_fir_tb` | impulse response span (delay 1 to 19), random data with gaps, exact zero output for a full-scale tone at fs/2, positive and negative saturation |
| `fir_direct_tb` | impulse gives the coefficients, random data with gaps, extremes |
| `fir_top_tb` | whole design at default parameters; the three units run together. It counts saturation, sample holds, fs/2 rejection, most-negative inputs and Booth add/subtract steps, and fails if any of them never occurred |

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
with a watchdog if it hangs. To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    --top-module fir_top_tb rtl/dsp_pkg.sv tb/fir_top_tb.sv
./obj_dir/Vfir_top_tb
```

Replace `fir_top_tb` with any other testbench name. `rtl/dsp_pkg.sv` must
be read first because the adder and multiplier modules import it. All
testbenches run in under a second.
