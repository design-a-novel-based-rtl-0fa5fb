# Multiplierless reconfigurable FIR filter with pipelined programmable-shift PEs

This is a full-parallel, symmetric FIR filter

    y(n) = sum_{k=0}^{M-1} h_k * x(n-k),     h_k = h_{M-1-k}

that has no multipliers and whose coefficients can be changed at run time
without changing the hardware. The idea has three parts:

* **Shared subexpressions.** Every 3-bit slice of a coefficient, with bit weights
  (2^0, 2^-1, 2^-2), multiplies x by one of only eight values: 0, x/4, x/2,
  3x/4, x, 5x/4, 3x/2 and 7x/4. These are the *binary common subexpressions*
  (BCS) of x. One shift-and-add unit computes all eight once per sample, and
  every tap uses them. Only four of them ([011], [101], [110], [111]) need an
  adder.
* **Programmable shift method (PSM).** A processing element (PE) forms
  `h * x` by picking at most five BCS outputs with multiplexers. It shifts each
  one to its bit position with a programmable shifter and adds the results. A
  coded word in a look-up table (LUT) tells the PE which BCS to pick, how far
  to shift, how many partial sums to use and whether to negate. Loading new
  words reconfigures the filter, for example for another radio standard.
* **Pipelining.** Each PE has two register stages, one after the BCS
  multiplexers and one before the final sign multiplexer. This cuts the
  longest combinational path from the shared unit to the delay line. The
  filter still takes one sample per clock.

Because the coefficients are symmetric, only `ceil(M/2)` PEs and LUT rows
exist. PE `j` feeds both tap `j` and tap `M-1-j` of a transposed direct-form
delay line.

## Coefficients and their coded form

A coefficient is sign-magnitude. Its 16 magnitude bits have weights from
2^0 down to 2^-15: one integer bit and fifteen fractional bits. So
|h| < 2, with a resolution of 2^-15.

Before loading, the magnitude is split into **operands**. Each operand is a
3-bit BCS pattern `b` placed at a right shift `s`:

    |h| = sum_i (b_i / 4) * 2^-s_i        (b_i in 0..7, s_i in 0..15)

Example: |h| = 1.6875 = `1101 1000 0000 0000` (binary, 2^0 first).

* The first group `110` at position 0 becomes operand (b = 6, s = 0). Its value is 1.5.
* The next set bit starts the group `110` at position 3. It becomes operand (b = 6, s = 3), with value 1.5/8.

Both operands take the same BCS output, 3x/2, shifted by different amounts.

The LUT word (`psm_fir_pkg::coef_code_t`, 39 bits) holds these fields:

| field          | bits | drives                                             |
|----------------|------|----------------------------------------------------|
| `op[i].bcs`    | 3 ×5 | select of Mux(i+1): which BCS output is `r_i`      |
| `op[i].shift`  | 4 ×5 | shift of PS(i+1): `shr_i = r_i >> s_i`              |
| `mux8_sel`     | 1    | 0: `shr4` goes to A4; 1: `A2 = shr4 + shr5` does  |
| `mux6_sel`     | 2    | product = `shr1`, `A1`, `A3` or `A4`              |
| `sign`         | 1    | Mux7 takes the two's complement                   |

Operands fill `op[0]` upward. `mux6_sel` follows the number of operands n:
`SEL_SHR1` for n ≤ 1, `SEL_A1` for 2, `SEL_A3` for 3 and `SEL_A4` for 4 or 5.
`mux8_sel` is 1 only when n = 5. The unused operands are ignored. A
coefficient of zero is the all-zero word.

Producing these words is an offline step. The filter itself does not do it.
`tb/psm_tb_pkg.sv` has a simple encoder:

1. Scan the magnitude from the 2^0 end.
2. At each set bit, take it and the next two bits as one operand.
3. Continue after that group.

A coefficient that this encoder cannot fit into five operands cannot be
loaded. An example is `1001 0010 0100 1001`, which has six isolated set bits.
Choose coefficients accordingly, or use a better common-subexpression search
that finds a five-operand form.

## The processing element (`psm_pe`)

```
 bcs[0..7] ──► Mux1..Mux5 (op[i].bcs) ──► r1..r5
               ══════ pipeline register 1 (r_i + remaining code fields) ══════
 PS1..PS5: shr_i = r_i >> op[i].shift
 A1 = shr1 + shr2      A2 = shr4 + shr5      A3 = A1 + shr3
 Mux8 = mux8_sel ? A2 : shr4                 A4 = A3 + Mux8
 Mux6 = {shr1, A1, A3, A4}[mux6_sel]         Complementer = -Mux6
               ══════ pipeline register 2 (Mux6, -Mux6, sign) ══════
 Mux7: prod = sign ? -Mux6 : Mux6
```

Arithmetic is exact throughout:

* The shift-and-add unit outputs `k*x`, i.e. the BCS value scaled by 4.
* Each shifter first appends 15 zero fraction bits, so `>> s` drops nothing.
* `prod` is therefore `h * x * 2^17`, an integer of `XW + 21` bits. That is
  enough for any LUT word, so the PE cannot overflow.

The code fields for the shifters, Mux8, Mux6 and the sign travel down the
pipeline with their data. A LUT write therefore affects whole samples. No
sample is ever computed with half an old and half a new coefficient.

Latency: `prod` is valid two rising edges after its `bcs`/`code` were
presented. A new product is produced every cycle.

## Filter structure (`psm_fir_top`)

```
 x_in ─► shift_add_unit ─► bcs[0..7] ─┬─► PE 0 ─► taps 0 and M-1
                                      ├─► PE 1 ─► taps 1 and M-2
                                      └─► ...
 coeff_lut rows 0..ceil(M/2)-1 ─► PE codes
 taps ─► structural_adders (transposed form):
     z[M-1] <= p[M-1];  z[k] <= p[k] + z[k+1];  y = p[0] + z[1]
```

* `y` is the full-precision sum `2^17 * sum h_k x(n-k)`, with
  `XW + 21 + clog2(M)` bits and no rounding or saturation. For a result in the
  units of `x`, take `y >>> 17`, or round as the application needs.
* Latency: the output for sample n appears two rising edges after sample n is
  presented, the two PE pipeline registers. `out_valid` is `in_valid` delayed
  by two. `in_valid` is only a flag. The filter computes on every cycle, so a
  cycle without a sample should present `x_in = 0`.
* Reconfiguration: `lut_we`/`lut_addr`/`lut_wdata` write one row per clock.
  Row `j` is coefficient `h_j`, which also serves as `h_{M-1-j}`. A row
  written at an edge applies to the samples presented after that edge.
  Outputs that mix old and new coefficients follow for `M-1` samples, as in
  any transposed-form filter whose coefficients change. Writes to rows
  `>= ceil(M/2)` are ignored.
* Reset: `rst_n` is asynchronous and active low. It clears the LUT (all
  coefficients zero), both pipeline stages and the delay line.

## Parameters

| parameter  | default | meaning                                          |
|------------|---------|--------------------------------------------------|
| `XW`       | 16      | input sample width (two's complement)            |
| `NUM_TAPS` | 16      | filter length M; `NUM_PE = ceil(M/2)`            |

These values are fixed in `psm_fir_pkg`:

* BCS width: 3.
* Operands per coefficient: 5, so five multiplexers, five shifters, and adders A1 to A4.
* Coefficient magnitude: 16 bits.
* Shift field: 4 bits.

Changing the operand count would mean redrawing the adder network in `psm_pe`.

## Files

`rtl/`:

* `psm_fir_pkg.sv`: shared constants, the coded-word struct and the Mux6 enum.
* `shift_add_unit.sv`: the shared BCS generator.
* `programmable_shifter.sv`: PS.
* `psm_pe.sv`: the pipelined processing element.
* `coeff_lut.sv`: the coefficient LUT.
* `structural_adders.sv`: the transposed delay line.
* `psm_fir_top.sv`: the filter.

`tb/`:

* One self-checking testbench per module (`tb_<module>.sv`).
* `psm_tb_pkg.sv`: the coefficient encoder and a random-coefficient generator.

Each testbench prints `TB_RESULT checks=N failures=F`.

* The PE test streams a new random coefficient and sample every cycle. It
  checks every product against a multiplication, two cycles later.
* `tb_psm_fir_top` runs the filter at its default size. It checks every output
  against a direct convolution that records which coefficient set each sample
  met. The run covers:
  * an impulse response;
  * random streams;
  * reloads with the filter idle and while it runs;
  * full-scale samples.

  It checks the two-cycle latency through `y` and `out_valid`. It also counts
  that every operand count (1 to 5), negative coefficients, both reload cases
  and valid gaps occurred.

To run a testbench with Verilator 5:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb \
        rtl/psm_fir_pkg.sv tb/psm_tb_pkg.sv tb/tb_psm_fir_top.sv \
        --top-module tb_psm_fir_top --Mdir obj
    ./obj/Vtb_psm_fir_top

The block testbenches are built the same way; name a different testbench file
and top module.

## What is given and what is chosen

These parts follow the architecture as described:

* the shared BCS shift-and-add unit with four adders;
* Mux1 to Mux5 selecting BCS outputs;
* programmable shifters controlled from the LUT;
* adders A1 to A4 with Mux8;
* Mux6 choosing the partial sum;
* the complementer and Mux7 for the sign;
* the two pipeline registers: between the multiplexers and the shifters, and between Mux6/complementer and Mux7;
* the 16-bit sign-magnitude coefficient with weights 2^0 to 2^-15;
* storing only half of the symmetric coefficients;
* the transposed direct form.

These are this design's own choices:

* the bit layout of the coded word and the 4-bit shift field;
* the order in which operands are placed and the Mux6/Mux8 select encodings;
* carrying the code fields along the pipeline;
* exact (unrounded) internal widths and the output width;
* the sample width (16) and the filter length (16);
* the LUT write port and the valid flag;
* the asynchronous reset.

Not included:

* the offline common-subexpression analysis that produces the coded words
  (the testbench encoder is a simple stand-in);
* a serial variant, where one PE is reused for all taps;
* the constant-shift (CSM) PE, an alternative where coefficients are stored
  uncoded and the final shifts are hardwired.

Coefficients that need more than five operands are outside what this PE can
represent.
