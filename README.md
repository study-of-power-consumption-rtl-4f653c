# Inner-product co-processors in 16-bit integer and short-word floating point

This RTL implements four small streaming co-processors that compute inner
products. They were first described for FPGA-based reconfigurable computing
in the thesis *Study of Power Consumption for High-Performance Reconfigurable
Computing Architectures*. There are two schemes, each for two data types:

| scheme | integer (unsigned 16-bit) | floating point (16-bit short word) |
|---|---|---|
| **multiply-accumulate**: one multiplier; an adder sums the products by feeding its result back to its own input; result is `sum(a_i*b_i)` over a vector | `int_mac` | `fp_mac` |
| **multiply-add**: two multipliers side by side feeding one adder; result is `a*b + c*d` for every four operands | `int_madd` | `fp_madd` |

All four are built from the same few parts: a pipelined carry-save array
multiplier, a 16-bit ripple adder or a four-stage floating-point adder, and
an input and an output buffer that connect the 16-bit datapath to a memory
that is 32 bits wide. `ipcp_top` puts the four co-processors side by side.
They share only clock and reset. Each has its own word streams, because each
was meant to be loaded into the FPGA on its own.

## Number formats

**Integer:** unsigned 16-bit, 0 to 65535. Products and sums are kept modulo
2^16. The integer co-processors raise `ovf` when a result did not fit.

**Floating point:** the short-word format of the ADSP-2106x (SHARC) DSPs:

```
 15 | 14 .. 11 | 10 .. 0
  s | exponent | fraction      value = (-1)^s * 1.fraction * 2^(exponent-7)
```

* The exponent is in excess-7 notation.
* Exponent 0 means exactly zero, and exponent 15 means infinity. The
  fraction is ignored for both, and the units write it as zero.
* There are no NaNs and no denormals.
* Normal values run from 2^-6 = 0.015625 to 255.9375.
* The leading one is not stored. It is called the phantom bit here.

Every unit truncates. No unit rounds.

`fp16_pkg` holds the struct type `fp16_t` for this format, the special
exponent codes, the adder latency, the 32-bit memory word type and the 16-bit
ripple adder function shared by the integer units.

## The array multiplier (`array_mult`)

An unsigned W x W multiplier, with W = 12 by default. The integer
co-processors use W = 16.

* The partial products `b[j] ? A << j : 0` are summed by W-2 rows of
  carry-save adders (CSAs).
* Row 0 adds partial products 0, 1 and 2. Each later row adds one more
  partial product to the sum and carry vectors coming from the row above.
* Inside a row every bit position is an independent full adder. No carry
  travels sideways, so a row's delay does not grow with W.
* A ripple-carry propagate adder after the last row merges the sum and
  carry vectors into the 2W-bit product. It starts with a half adder
  followed by full adders.

That makes W-1 logic levels. `STAGES` (1 to W-1, default 8) register ranks
are spread evenly over them, and the last rank is always on the product. The
latency is exactly `STAGES` clocks, and a new operand pair can enter on every
clock. The source measured the 12-bit multiplier with 1 to 8 stages. On its
FPGAs the fastest version was the one with 8 stages.

## The floating-point multiplier (`fp_mult`)

Three paths run in parallel:

1. **Sign:** the XOR of the two operand signs.
2. **Significands:** the 12-bit significands `1.m1` and `1.m2` go through the
   12-bit `array_mult`. Only the upper 13 bits of the 24-bit product are
   used.
3. **Exponents:** the two excess-7 exponents are added. Their sum carries
   the bias twice, so one bias must be removed.

Both significands lie in [1,2), so their product lies in [1,4). The top bit
of the product (the *exponent adjust select*) decides two things:

* **Top bit 1** (product in [2,4)): the fraction is product bits 22..12, and
  the bias removed is 6. Removing 6 instead of 7 adds one to the exponent.
* **Top bit 0:** bit 22 is the leading one, the fraction is bits 21..11, and
  the bias removed is 7.

Special cases:

* A biased result of 0 or below is an underflow and gives zero.
* A biased result of 15 or above is an overflow and gives infinity.
* A zero operand forces zero, and an infinite operand forces infinity.
  Infinity wins, so 0 x inf = inf.

The exponent information travels in a delay line beside the array
multiplier. The latency is `STAGES` clocks, with one product per clock.

## The floating-point adder (`fp_add`)

This is the most involved unit. It has five steps separated by four
register ranks, so the latency is 4 clocks (`FP_ADD_LATENCY`), with one sum
per clock.

1. **Check and phantom bit.** A zero operand gets significand 0. Any other
   operand gets `1.m`. The unit notes whether an operand is infinite.
2. **Compare exponents by subtraction.** A 5-bit adder forms
   `{0,e1} + ~{0,e2} + 1`.
   * Bit 4 (*pos./neg.*) is one when e2 > e1.
   * The shift distance is the magnitude of the low four bits. When e2 > e1
     those bits are the two's complement of the distance, so the unit
     negates them.
   * The bias cancels in the subtraction, so the excess-7 coding does not
     matter here.
3. **Choose the exponent and align.** Four 2:1 multiplexers pick e2 when
   pos./neg. is one, and e1 otherwise. There are two right-shift units:
   * The `1.m1` shifter is enabled by pos./neg. and the `1.m2` shifter by its
     complement.
   * The operand with the smaller exponent moves right by the distance.
   * Bits shifted out are lost.
4. **Add or subtract.** The 12-bit significands are zero-extended to 13 bits
   and added.
   * When the signs differ, the negative operand is inverted and the carry
     in is set. That forms a two's-complement subtraction.
   * A missing carry out then means the difference is negative. A second
     13-bit adder negates it back to a magnitude (invert, carry in), and
     the result sign becomes 1.
   * When both signs are negative the magnitudes are simply added, and the
     sign is kept.
5. **Normalise** (combinational after the last rank). There are three cases:
   * Sum bit 12 set: take bits 11..1 and add one to the exponent. Example:
     1.125 + 1.0.
   * Bit 11 set: take bits 10..0 unchanged. Example: 1.125 + 0.25.
   * Otherwise: shift left until bit 11 is one, subtracting one from the
     exponent per place. The unit selects the bits directly instead of
     shifting them one place at a time. Example: 1.375 - 1.0, which shifts
     left by two places.

   Further rules:
   * An exact zero sum gives +0.
   * An exponent that falls to 0 or below gives +0.
   * An exponent that reaches 15 gives infinity.
   * An infinite operand gives infinity with that operand's sign, or the
     first operand's sign when both are infinite.

## The co-processors

### Memory words: `input_buffer` and `output_buffer`

The board memory is 32 bits wide, so one word carries two 16-bit operands:
the first in bits 15..0 and the second in bits 31..16.

**`input_buffer`** collects `WORDS` words per operand set, using a
valid/ready handshake on both sides.

* Multiply-accumulate uses one word per set: the pair (a_i, b_i).
* Multiply-add needs four operands, so it uses two words: (a, b), then
  (c, d). The arithmetic behind it is therefore issued at most on every
  second clock, and a word stream of one word per clock gives one result
  per two clocks.
* The source ran this half-rate part from a second clock at half frequency
  and saw intermittent errors that it suspected came from that clock. Here
  there is one clock, and the buffer simply issues every second cycle.

**`output_buffer`** packs results two to a word, the first in the low half.
`flush` pushes out a half-filled word, and `out_half` marks it. The buffer
takes no back-pressure.

### Multiply-accumulate: the feedback loop

* **`int_mac`:** the 16x16 product's low half is added to the accumulator by
  a 16-bit ripple adder in the same clock in which the product appears. The
  loop is closed within one clock, so a pair is accepted on every clock.
* **`in_last`:** marks the word that holds the last pair of a vector. After
  it, the sum goes to the output buffer and the next vector starts from
  zero.

**`fp_mac`** is harder, because its adder is a four-stage pipeline whose
output must come back to its own input. A product may only enter the adder
after the previous sum has come out. The multiplier pipeline cannot be
stopped halfway, so the stall happens at the input instead:

* Operand pairs are issued from the input buffer at least `FP_ADD_LATENCY`
  (4) clocks apart, and `in_ready` drops in between.
* The product then reaches the adder in the very clock in which the previous
  sum leaves it. That sum is used directly and also kept in a register for
  products that arrive later.
* An assertion checks that a product never meets a sum still in flight.

The result is one pair per 4 clocks. This spacing is a choice made in this
design. The source only draws the feedback path.

### Multiply-add

`int_madd` and `fp_madd` instantiate two multipliers fed by the same issue
and add their outputs. Neither can stall. Their `in_ready` is always high,
and synthesis reduces it to a constant.

### Latencies at the default `MULT_STAGES = 8`

Latency is counted from the clock the relevant word is accepted, or issued,
to the clock the result enters the output buffer. The packed word then
appears one clock later, once its partner result has arrived or `flush` has
been given.

| co-processor | latency | throughput |
|---|---|---|
| `int_mac` | 1 + MULT_STAGES = 9, from the last pair | 1 pair per clock |
| `int_madd` | 1 + MULT_STAGES = 9, from the second word | 1 result per 2 clocks |
| `fp_mac` | MULT_STAGES + 4 = 12, from the issue of the last pair | 1 pair per 4 clocks |
| `fp_madd` | 1 + MULT_STAGES + 4 = 13, from the second word | 1 result per 2 clocks |

## Departures from the source and choices made here

* **Rounding.** None. Every step truncates.
* **Multiplier fraction field.** The source's multiplier diagram gives the
  fraction for the "no adjust" case as a 10-bit range. The 11-bit output
  bus makes clear that bits 10..0 of the upper 13 product bits are meant,
  and that is what is built.
* **Exponent difference.** The source's comparison diagram feeds the raw
  low four bits of the subtraction to the shifters. Here the difference is
  made positive first (see step 2 of the adder).
* **Special values.** The source names the zero and infinity checks but
  not all their consequences. The rules given above (infinity wins, +0 for
  zero sums, fraction cleared) are this design's own.
* **Integer widths.** Only the low 16 bits of each 32-bit integer product
  reach the 16-bit adder. The `ovf` flag is added here.
* **Half rate.** The multiply-add units use an issue slot on every second
  clock, not a divided clock.
* **Accumulation.** The issue spacing of `fp_mac` and the `in_last` vector
  delimiter are added here.
* **Interfaces.** Word layout, the valid/ready handshake, flush and packing
  of results, asynchronous active-low reset of every register and the
  default `MULT_STAGES = 8` are all choices made here. The source's
  co-processors were never given a fixed number of stages.
* **Not modelled.** The FPGA fabric the design was mapped onto (logic
  blocks, I/O blocks, routing, power grid), the PCI board with its memories
  and host software, and the probabilistic power estimation. None of these
  is logic of the design.

## Files

```
rtl/fp16_pkg.sv       format types, constants, 16-bit ripple adder function
rtl/array_mult.sv     pipelined carry-save array multiplier
rtl/fp_mult.sv        floating-point multiplier (uses array_mult)
rtl/fp_add.sv         four-stage floating-point adder
rtl/input_buffer.sv   32-bit words -> operand sets
rtl/output_buffer.sv  16-bit results -> 32-bit words
rtl/int_mac.sv  rtl/int_madd.sv  rtl/fp_mac.sv  rtl/fp_madd.sv
rtl/ipcp_top.sv       the four co-processors side by side
tb/tb_fp16_ref_pkg.sv reference arithmetic for the float testbenches
tb/tb_<module>.sv     one self-checking testbench per module
```

## Verification

Every testbench is self-checking. It compares against values computed
independently in the testbench, counts checks and failures, and prints one
line `TB_RESULT checks=N failures=M`. A watchdog ends a run that hangs.

**Float reference.** The float reference (`tb_fp16_ref_pkg`) does not copy
the hardware steps. It converts operands to real numbers, multiplies or
adds exactly in double precision and truncates the result back to the
16-bit format. For the adder it first drops the bits the aligned operand
loses, because the hardware does too.

What each testbench covers:

* **`tb_array_mult`:** W = 12 with every stage count from 1 to 8, and W = 16 with 8
  stages. It checks every product and its exact latency.
* **`tb_fp_mult`:**
  * both normalisation cases
  * overflow and underflow
  * zero and infinite operands
  * exact latency
* **`tb_fp_add`:**
  * all three normalisation cases
  * negative differences
  * exact zero sums
  * overflow and underflow
  * infinities
  * exact latency
* **`tb_input_buffer` and `tb_output_buffer`:**
  * random back-pressure, gaps and flushes
  * one set per clock from the one-word buffer
  * one set per two clocks from the two-word buffer
* **Co-processor testbenches:**
  * random vectors and quadruples
  * exact latencies and throughput
  * the `fp_mac` stall
  * integer overflow
* **`tb_ipcp_top`:** drives all four co-processors at once, with the top at
  its default parameters. It fails if any of these mechanisms never occurs:
  the stall, half-rate issue, vector restart, integer overflow, multiplier
  exponent adjust, overflow and underflow, the three adder normalisation
  cases, negative differences, and full and half output words.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fp16_pkg.sv tb/tb_fp16_ref_pkg.sv -y rtl -y tb +libext+.sv \
    tb/tb_ipcp_top.sv --top-module tb_ipcp_top -Mdir obj -o sim
./obj/sim
```

Each test finishes in seconds.

**Changing parameters.** `MULT_STAGES` on a co-processor or on the top sets
the depth of every multiplier in it. It must be at least 2, and at most
W-1: 11 for the float units, 15 for the integer units. `STAGES` and `W` on
`array_mult` can be set directly. The adder's depth is fixed by its
structure. If you change it, also change `FP_ADD_LATENCY` in `fp16_pkg`,
which sets the issue spacing of `fp_mac`.
