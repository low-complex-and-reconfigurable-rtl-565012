# Reconfigurable 4-tap FIR filter with radix-8 Booth coefficient multipliers

A programmable FIR filter spends nearly all of its area and power in its
coefficient multipliers. When the coefficients can be changed at run time, the
multipliers cannot be hard-wired shift-and-add networks for fixed constants;
they have to be general multipliers, or something that can be reprogrammed.
This design is a 4-tap, 8-bit programmable FIR filter

    y[n] = b0*x[n] + b1*x[n-1] + b2*x[n-2] + b3*x[n-3]

that gives two answers to that problem, selectable by a parameter:

* **Radix-8 modified Booth multipliers (default).** The sample is recoded
  into three signed radix-8 digits, so each product has only three partial
  products. The one awkward multiple of radix 8, 3·b, is computed once when
  a coefficient is written and stored beside it. The multipliers never form
  it themselves.
* **Double-base shift-and-add multipliers** (`ARCH = MULT_EDBNS`). Each
  coefficient is written as a short signed sum of terms 2^i·3^j. One shared
  generator forms x, 3x and 9x. Each tap then only selects, shifts and adds.
  A look-up table turns a coefficient into the selections and shifts.

Both variants have the same ports, timing and results, bit for bit.

## Filter structure and timing (`fir_filter`)

The filter is in transposed form. Every tap multiplies the *current* sample by
its own coefficient. The products run through a chain of adders and registers
from b3 towards the output:

    z3 <= b3*x
    z2 <= b2*x + z3
    z1 <= b1*x + z2
    y  <= b0*x + z1          (registered output)

The critical path is one multiplier plus one adder, whatever the number of
taps. The sample is broadcast to all taps: there is no input delay line.

| port | width | meaning |
|---|---|---|
| `clk`, `rst_n` | 1 | clock; asynchronous active-low reset, clears coefficients, chain and output |
| `s_u` | 1 | 1: samples and coefficients are two's complement; 0: unsigned |
| `coef_we`, `coef_addr`, `coef_data` | 1, 2, 8 | write coefficient b[`coef_addr`]; in effect from the next cycle |
| `x_valid`, `x_in` | 1, 8 | one sample per cycle when `x_valid` is high; the chain holds while it is low |
| `y_valid`, `y_out` | 1, 18 | `y_out` is y[n] for the sample taken at the previous edge |

* **Latency and rate.** The latency is one clock. The filter accepts one sample per clock.
* **Output width.** `y_out` is 2·8 + log2(4) = 18 bits. It is exact for four
  full-scale products in either signedness.
* **Reloading while streaming.** A coefficient may be rewritten while samples
  stream. As in any transposed filter, the partial sums already in the chain
  keep the products of the old coefficient. For about three samples the
  output mixes old and new coefficients.
* **Changing `s_u`.** The stored 3·b (Booth) or control word (double base) is
  formed with the `s_u` in force at the write. After changing `s_u`, rewrite
  all four coefficients before streaming again.

Parameters: `N` (data width, 8), `NTAP` (4), `ACC_W` (18), `ARCH`
(`MULT_BOOTH_R8` or `MULT_EDBNS`). The Booth datapath is built for three Booth
digits, so `N` can be 6 to 8 only. `NTAP` may be any value of at least 2.

## Radix-8 Booth recoding (`booth_r8_encoder`)

This is the part that needs the most care. The 8-bit multiplier y (the sample)
is first widened:

* A 0 is placed below bit 0.
* An extension bit goes above bit 7. It is `s_u & y7`: a copy of the sign bit
  for signed data, and 0 for unsigned data.

The widened value is read as three quartets that overlap by one bit:

    digit 0 : y2 y1 y0 0
    digit 1 : y5 y4 y3 y2
    digit 2 : ext y7 y6 y5

Each quartet q3 q2 q1 q0 becomes the digit −4·q3 + 2·q2 + q1 + q0:

| quartet | digit | quartet | digit |
|---|---|---|---|
| 0000 | 0 | 1000 | −4 |
| 0001, 0010 | +1 | 1001, 1010 | −3 |
| 0011, 0100 | +2 | 1011, 1100 | −2 |
| 0101, 0110 | +3 | 1101, 1110 | −1 |
| 0111 | +4 | 1111 | 0 |

The three digits satisfy y = d0 + 8·d1 + 64·d2. Two examples:

* y = 0x5B = 91 (unsigned): the quartets are 0110, 0110, 0010. The digits are
  +3, +3, +1, and 3 + 24 + 64 = 91.
* The same byte signed is −37: the top quartet becomes 1110, so d2 = −1, and
  3 + 24 − 64 = −37.

A digit is carried as a sign bit plus a one-hot magnitude (`one`, `two`,
`three`, `four`). Zero has all five bits low.

### Why 3·b is stored

Each digit selects one multiple of the multiplicand: 0, ±b, ±2b, ±3b or ±4b.

* 2b and 4b are shifts of b.
* A negative multiple is the two's complement of the positive one.
* 3b is the exception: it needs a real addition, 2b + b.

In a filter the multiplicand is the coefficient. It is known long before any
sample arrives. So `coef_bank` forms 3b with one shared adder (`triple_gen`)
when the coefficient is written, and stores both b and 3b. Each tap multiplier
(`booth_r8_multiplier`) receives both values, and its path holds only
selection and addition.

The four taps encode the same sample. Their encoders are therefore identical
logic, and synthesis may merge them.

## Partial product summation (`booth_r8_product`, `csa_3to2`, `cla_adder`)

1. The Booth selector (`booth_r8_ppgen`) forms the product digit·b, 12 bits wide.
2. Each of the three partial products is sign-extended to 16 bits and shifted
   left by 0, 3 or 6 places.
3. One row of full adders (`csa_3to2`) reduces the three rows to a sum row and a
   carry row. For three rows, that one layer is the whole Wallace tree.
4. A carry look-ahead adder (`cla_adder`) adds the two rows.

The adder works in two levels:

* **Inside a group.** The bits form groups of 4. Every carry inside a group is
  a flat sum of products of generate and propagate.
* **Between groups.** Each group's generate and propagate feed a second
  look-ahead level that gives each group's carry-in.

The 16-bit product is exact in both signednesses. The filter sign-extends it
(`s_u = 1`) or zero-extends it (`s_u = 0`) before accumulation.

## Double-base multiplier (`ARCH = MULT_EDBNS`)

Each coefficient c, after extension to 9 bits, is stored as up to three terms:

    c = Σ ±2^shift · 3^pow3,   pow3 ∈ {0, 1, 2}

The hardware has four parts:

* **`pobg`** (product-of-base generator). It forms x, 3x = 2x + x and
  9x = 8x + x once. All taps share it.
* **`pobs`** (product-of-base selector). Each tap has three multiplexers. Each
  picks one of x, 3x, 9x, or 0 for an unused term. A multiplexer is wired
  only to the multiples that some coefficient actually routes to it. This is
  found during elaboration by scanning the encoding of every coefficient. For
  8-bit coefficients the third term never needs 9x, so its multiplexer has
  only x, 3x and 0.
* **`dbcg`** (double-base coefficient generator). Each tap shifts each selected
  value by 2^shift and negates subtracted terms. It adds the three terms with
  one carry-save layer and the carry look-ahead adder.
* **`edbns_lut`**. It maps a coefficient to the per-term control word: enable,
  sign, pow3, and a 4-bit shift. `edbns_coef_store` reads it once per
  coefficient write and keeps the word in the tap register.

**How the table is filled.** The 512-entry table is computed during
elaboration, so there is no data file. The rule is greedy:

1. Pick the term 2^i·3^j nearest the remainder. On a tie, take the smaller one.
2. Subtract that term with the sign of the remainder.
3. Repeat until the remainder is zero.

With the powers of three 1, 3 and 9, every value from −256 to 255 needs at most
three terms. For example, 100 = 3·2^5 + 2^2.

This greedy rule is a simple stand-in. It does not search for the fewest terms
or the cheapest multiplexers (see *Not built* at the end).

## Module map

| module | role |
|---|---|
| `fir_pkg` | widths, Booth digit type, double-base term/word types, `mult_arch_e` |
| `fir_filter` | top: coefficient store, tap multipliers, transposed chain |
| `coef_bank`, `triple_gen` | coefficient registers with stored 3b; the 2b + b adder |
| `booth_r8_multiplier` | one tap: encoder + `booth_r8_product` |
| `booth_r8_encoder`, `booth_r8_ppgen`, `booth_r8_product` | recoding, digit selection, partial product sum |
| `csa_3to2`, `cla_adder` | carry-save layer, carry look-ahead adder |
| `edbns_coef_store`, `edbns_lut` | double-base control-word store and its table |
| `pobg`, `pobs`, `dbcg` | double-base generator, selectors, shift-and-add |

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. List the package first. For example:

    verilator --binary --timing --assert -Irtl rtl/fir_pkg.sv tb/tb_fir_filter.sv \
              --top-module tb_fir_filter -Wno-fatal
    ./obj_dir/Vtb_fir_filter

**End-to-end tests.**

* `tb_fir_filter` runs the filter at its default parameters. `tb_fir_filter_edbns`
  runs the double-base variant.
* Each streams about 3,100 samples with idle cycles. It reloads coefficients
  during streaming and switches between signed and unsigned operation four
  times.
* It checks every output value and that `y_valid` follows `x_valid` by exactly
  one clock.
* The reference model keeps, for each sample, the coefficients in force when
  it arrived. That models the transposed chain exactly across reloads.
* Each test counts how often each mechanism happened, and fails if one never
  did. The Booth test counts every Booth digit −4..+4. The double-base test
  counts coefficients of 1, 2 and 3 terms, subtracted terms, and each of x, 3x
  and 9x.

**Unit tests.**

* Exhaustive: `tb_booth_r8_multiplier` (all 65,536 operand pairs, both
  signednesses), `tb_booth_r8_encoder`, `tb_triple_gen`, `tb_booth_r8_ppgen`,
  `tb_edbns_lut` and `tb_pobg`.
* Random plus corner cases: `tb_csa_3to2`, `tb_cla_adder` (16 and 11 bits),
  `tb_pobs`, `tb_dbcg`, `tb_coef_bank` and `tb_edbns_coef_store`.

All of them pass with Verilator 5. Each testbench was also run against a copy
of its module with one deliberate error, and each one caught it. The RTL is
lint-clean apart from notices about unused package constants and unused
signals: adder carry-outs, and the top bit
of the carry-save majority that is shifted out.

## What follows the source design and what is this design's choice

**Taken from the source design:**

* the transposed 4-tap structure and the 8-bit width;
* the radix-8 quartet recoding table and the `s_u`-controlled extension bit;
* the Booth partial-product set 0, ±A, ±2A, ±3A, ±4A, with 3A formed as 2A + A;
* precomputing 3A because the multiplicands (the coefficients) are known ahead
  of time;
* carry-save (Wallace) reduction with a final carry look-ahead adder;
* the double-base organisation: a shared power-of-base generator, a
  multiplexer bank per tap, programmable shifters, CSA summation, and a LUT
  addressed by the coefficient that holds the shifts.

**This design's choices:**

* the write port, the valid handshake and the reset;
* latency one and the 18-bit accumulation;
* the digit format and the two-level 4-bit look-ahead grouping;
* making Booth the default;
* in the double-base variant: the bases 2 and 3, the powers of three {1, 3, 9},
  at most three terms, the greedy table, and looking the word up at write
  time.

**Not built:**

* The source design obtains its double-base representations from an *extended*
  double-base number system. A search algorithm picks quasi-minimal
  representations, and reduction rules then remove multiplexer inputs that no
  coefficient uses. It also merges double-base terms to cut multiplexing cost.
  None of these is specified in enough detail to reproduce, so the double-base
  variant uses a plain 2/3 double-base form and the greedy table. It prunes
  only the multiplexer inputs that no coefficient uses. Its results are exact. Its area is not that of
  the optimised source architecture.
* No power or area figures are claimed.
