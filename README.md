# Bit-sequential floating point: multiplier, adder and two arrays built from them

A 32-bit floating point multiply or add costs a large parallel datapath.
This design does the same arithmetic one bit per clock instead. Every
number travels on two wires, least significant bit first, and a word
takes 24 clock cycles:

- the **mantissa wire** carries the 24-bit mantissa;
- the **exponent wire** carries the 8-bit exponent, then the sign, then 15
  padding bits.

A unit has only a handful of pins, and its logic is a few hundred
flip-flops. Each unit starts a new operation every 24 cycles, so many of
them working in parallel give useful throughput. That is how the two
arrays here use them:

- a systolic **matrix-vector multiplier**;
- a parallel-pipelined **FFT** built from complex butterflies, 8 points by
  default.

The SystemVerilog below is synthesizable, checked bit-exactly against a
reference model, and runs at full size in a plain Verilator simulation.

## Number format

A word is `{S, E[7:0], M[23:0]}` with value `(-1)^S * 2^(E-128) * M * 2^-23`.

- `M` carries its leading one explicitly, so a normalised mantissa lies in
  `[2^23, 2^24)`.
- `E = 0` means the number is zero.
- There are no denormals, infinities or NaNs.
- Results whose exponent would pass 255 **overflow**. The mantissa and
  exponent are then forced to all ones and the sign is kept.
- Results below the smallest normal number **underflow**, and so do exact
  zeros. The word is then all zeros.

On the wires, bit *k* of a word is on the line in cycle *k* after the word
reset. The mantissa wire carries `M[k]`. The exponent wire carries `E[k]`
for k < 8, `S` at k = 8, and zeros for k = 9..23. Inputs ignore the padding
bits; outputs drive them as zero.

Every unit has a **word reset** input. It is high in the cycle of the
operands' least significant bits. Each unit also puts out a reset that
marks the least significant bit of its result. Chaining these resets is
how the arrays keep time; there is no other control. There is no global
reset either. Each unit's state is overwritten by every new word, so after
about 100 idle cycles with the inputs held at zero, the pipeline is clean.

## The multiplier (`fpmpy`, 74 cycles)

`fpmpy` is a mantissa multiplier followed by an exponent and formatting
section.

**`manmpy`** is a systolic array of 24 one-bit cells (`mmpy_cell`). It
produces the full 48-bit product of the mantissas:

- Cell *i* captures multiplicand bit *i* as the word reset passes through
  it.
- Each cell adds (its multiplicand bit AND the multiplier stream) to the
  partial product arriving from the previous cell.
- The multiplier stream and the reset move two flip-flops per cell; the
  multiplicand moves one.
- When the reset passes a cell, the cell puts its finished low product bit
  onto a second chain (LSP) and sends its carry down the partial product
  chain instead of a sum bit.
- Product bit *n* leaves in cycle 25 + *n*: bits 0–23 on `lsp`, bits
  24–47 on `msp`. `rst48` marks bit 24.

**`expfmt`** does the rest:

- While the mantissas are still being multiplied, it adds the exponents
  with a bit-serial adder and XORs the signs.
- From the 9-bit exponent sum it derives five flags:
  - overflow (sum ≥ 384);
  - the border case sum = 383, which overflows if the product needs a right
    shift;
  - underflow (sum < 128);
  - the border case sum = 128, which underflows unless the product shifts
    right;
  - zero (an input exponent is 0).
- When the top half of the product arrives, it decides the shift. The
  product shifts right by one when bit 47 is set, or when rounding would
  carry out of the mantissa. That carry is detected before rounding: the
  24 mantissa bits and the round bit are all ones.
- It rounds to nearest, with ties going to even. The round bit and a sticky
  OR of all lower product bits decide the rounding.
- Two serial half adders then round the mantissa and increment the
  exponent as the result is shifted out.
- The result leaves 74 cycles after the input, marked by `rst74`, with
  NEG, ZRO, OVF, UNF and INX. INX means the result was rounded, or
  overflowed or underflowed.

## The adder (`fpadd`, 76 cycles)

`fpadd` is the harder unit. Alignment and renormalisation depend on the
data, yet everything has to fit a fixed pipeline of 24-cycle slots.
`SUBTRG` and `SUBTRD` are sampled with the word reset and flip the sign of
the augend and the addend, so the unit computes ±a ± b.

1. **Compare (cycles 0–23).**
   - The exponent difference is formed bit-serially.
   - At the same time, a serial comparator finds which mantissa is larger,
     so the larger operand is known even when the exponents are equal. On
     an exact tie the augend counts as the smaller.
   - The smaller operand is always the one shifted and subtracted. A
     subtraction therefore never goes negative, and the result takes the
     larger operand's sign.
2. **Align (24–47).**
   - The smaller mantissa shifts right in a register that the down-counter
     DNRMCTR enables, at most 23 places.
   - The bits that fall out pass through guard, round and sticky bits. The
     sticky bit ORs in everything it receives.
   - A small parallel shifter on {lsb, guard, round, sticky} applies any
     remaining shift. Operands more than 26 places apart thus reduce to a
     sticky bit.
3. **Add (48–71).**
   - A small parallel adder combines the guard, round and sticky bits of
     the two operands.
   - The 24 mantissa bits are then added or subtracted serially.
   - As each sum bit appears, RNRMCTR counts leading zeros and restarts at
     every one.
   - Alongside it, EXPCTR counts down from the larger exponent on each zero
     and reloads it on each one. When the last bit is out, EXPCTR already
     holds the renormalised exponent.
4. **Normalise, round, format (72–99).**
   - The stored sum is shifted one place right on a carry out, or RNRMCTR
     places left. It is then rounded to nearest, ties to even.
   - The rounding carry is predicted before rounding: all ones in the
     mantissa with the right guard and round bits.
   - Overflow, underflow and zero are formatted as in the multiplier, and
     the word leaves from cycle 76, marked by `rst76`.

## The butterfly (`fp_butterfly`, 226 cycles)

The butterfly computes X0 = x0 + W·x1 and X1 = x0 − W·x1 on complex numbers.
It uses four multipliers and six adders:

- The multipliers form Re x1·Re W, Im x1·Im W, Re x1·Im W and Im x1·Re W.
- Two adders form Re(W·x1), by subtracting with SUBTRD, and Im(W·x1).
- Four adders form the outputs; the two for X1 subtract.
- x0 waits in a 150-cycle delay line, so it meets W·x1 at the output adders.

A new butterfly can start every 24 cycles. Results appear 74 + 2·76 = 226
cycles after the inputs. The output adders' OVF/UNF/INX flags come out as
4-bit vectors ordered {Im X1, Re X1, Im X0, Re X0}.

## The FFT (`fp_fft`, 226·log2 N cycles)

`fp_fft` is (N/2)·log2 N butterflies in log2 N stages, wired as the
radix-2 decimation-in-time graph. `N` is a parameter, any power of two;
the default 8 gives twelve butterflies in three stages:

- Inputs are taken in bit-reversed order: x0 x4 x2 x6 x1 x5 x3 x7 for N = 8.
- The stage of span H (H = 1, 2, 4, …) pairs the words at positions *i*
  and *i* + H, and multiplies the second by W^((i mod H)·N/(2H)), where
  W = e^(−j2π/N).
- For N = 8 the twiddle powers are W^0 in stage 1, W^0/W^2 in stage 2, and
  W^0..W^3 in stage 3.

Each butterfly takes its coefficient from its own **`fp_twiddle_rom`**.
The ROM puts W^K out serially on two two-wire buses, one for the real part
and one for the imaginary part, starting with the same word reset as the
data. The value is computed at elaboration from `$cos`/`$sin` and rounded
to nearest. For N = 8 only 0, ±1 and ±√2/2 occur; √2/2 is stored as
E = 127, M = 0xB504F3.

Ports and timing:

- Ports are `x_re[i]/x_im[i]` in and `X_re[k]/X_im[k]` out, all in natural
  order.
- Butterfly *k* of the last stage produces bins X(k) and X(k+N/2).
- One transform can start every 24 cycles.
- Results appear 226·log2 N cycles later (678 for N = 8), marked by
  `rst_out`.
- The `ovf/unf/inx[k]` flags are the last stage's flags for bin *k*.

## The matrix-vector multiplier (`fp_matvec`, 74 + 76·(N−1) cycles)

`fp_matvec` computes c = A·b with a chain of `N` cells (default 4):

- Cell 0 only multiplies.
- Every later cell multiplies and adds its product to the running inner
  product handed on by the cell before.
- Cell *j* holds b(j) as a parallel word and re-serialises it for every
  row.
- One row of A enters every 24 cycles, and c(i) leaves the last cell.

Loading b: raise `b_load` and send b(0), b(1), … as words on `b_in`, each
with a word reset. Each is written into the next cell. `b_load` must drop
for at least one cycle before a new load, which starts again at cell 0.

Feeding rows: all multipliers work in parallel. Each cell's product must
reach its adder just as the partial sum arrives, 76 cycles after the
previous adder started. The columns are therefore skewed:

- columns 0 and 1 start with the row's word reset;
- column *j* ≥ 2 starts 76·(*j*−1) cycles later.

The array delays its internal resets to match; the caller skews the data.

## The top (`fpbs_top`)

`fpbs_top` holds an 8-point FFT and a 4×4 matrix-vector array side by
side. They
share only the clock, and their ports carry `fft_` and `mv_` prefixes.

After synthesis (yosys, coarse), the whole design is about 40,000
word-level cells, 52,000 flip-flop bits and 13,700 memory bits. The
memory bits are the x0 delay lines.

| unit | cells | flip-flop bits |
|---|---|---|
| multiplier | 643 | 471 |
| adder | 182 | 440 |
| butterfly | 3,157 | 4,135 (+1,024 memory bits) |

## Where this design departs from the original description

The arithmetic follows the original description: formats, flags, rounding,
border cases and latencies. The following are choices or changes made
here:

- **Exponent difference.** The adder uses two's complement; the original
  uses one's complement. The result is the same.
- **Adder renormalisation.** The original selects the output bits with
  three pointers into a shift register (shift right, no shift, shift
  left). Here the stored sum goes through a parallel shifter before it is
  shifted out. The result is identical, and the latency is unchanged.
- **Multiplier sticky bit.** It is an OR over a captured copy of the low
  product half, not a serial OR.
- **Signal polarity.** The cells use positive logic. The original cell
  schematics use inverted partial product and reset nets.
- **Array end cells.** The first and last cells of the mantissa array are
  ordinary cells with tied-off inputs, not reduced variants.
- **Internal stage boundaries.** Where the original gives only totals, the
  stage boundaries inside the 74- and 76-cycle pipelines are chosen here.
- **Butterfly additions.** The x0 delay line and the flag outputs are
  additions. The original mentions "10 data wires" per butterfly, which
  does not match two wires per real number; this design has twelve input
  and eight output wires.
- **FFT output numbering.** The FFT drawing numbers the outputs by row.
  Here they are numbered by frequency bin, which is what the butterflies
  compute.
- **Coefficient memory.** The original describes the coefficient source
  only as a memory that repeats the coefficients every word on two wires.
  Here it is a constant per butterfly, because each butterfly of the
  pipelined FFT always uses the same power of W.
- **Matrix-vector array.**
  - The drawing skews the columns by one word per cell. That does not fit
    a 76-cycle adder, so the skew follows the stated total delay,
    74 + 76·(n−1), instead.
  - The b-load port and its protocol are this design's own; the original
    does not show how b reaches the cells.
- **Sizes.** The defaults are the sizes drawn in the original: an 8-point
  FFT and a 4×4 matrix-vector array. Both modules take their size as the
  parameter `N`. The FFT testbench also runs N = 16.
- **Not modelled.** Speed (about 0.9 Mflop/s for the multiplier and
  0.33 Mflop/s for the adder in the original technology), transistor
  counts and packaging.

## Files

| file | contents |
|---|---|
| `rtl/fpbs_pkg.sv` | word length, field widths, bias, unit latencies |
| `rtl/bs_full_adder.sv` | bit-serial full adder with reset-cleared carry |
| `rtl/mmpy_cell.sv`, `rtl/manmpy.sv` | systolic 24×24 mantissa multiplier |
| `rtl/expfmt.sv`, `rtl/fpmpy.sv` | exponent/rounding section and the multiplier |
| `rtl/fpadd.sv` | adder/subtractor |
| `rtl/fpbs_delay.sv` | shift-register delay line |
| `rtl/fp_butterfly.sv` | complex butterfly |
| `rtl/fp_twiddle_rom.sv`, `rtl/fp_fft.sv` | coefficient ROM and N-point FFT |
| `rtl/fp_matvec_cell.sv`, `rtl/fp_matvec.sv` | matrix-vector cell and array |
| `rtl/fpbs_top.sv` | both arrays side by side |
| `tb/fpbs_ref_pkg.sv` | reference model: exact multiply and add with the same rounding, flags and formatting |
| `tb/tb_*.sv` | one self-checking testbench per unit |
| `tb/fft_checker.sv`, `tb/matvec_checker.sv` | stimulus and checkers shared by the array and top testbenches |

## Simulating

Each testbench drives random and targeted operands and compares every
output word and flag with `fpbs_ref_pkg`. It also checks the latency and
ends with a line `TB_RESULT checks=N failures=M`. The array testbenches
also count how often each mechanism occurred: back-to-back words,
overflow, underflow, exact zero, rounding, and reloading b. A mechanism
that never occurred counts as a failure.

Example, for the whole design at full size (about a minute):

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
  rtl/fpbs_pkg.sv tb/fpbs_ref_pkg.sv tb/tb_fpbs_top.sv \
  --top-module tb_fpbs_top -Mdir obj_top -o sim
obj_top/sim
```

Replace `tb_fpbs_top` with any other `tb_*` module to test one unit. The
testbenches ignore output resets during the first few hundred cycles,
because the pipeline's state is random at power-up.
