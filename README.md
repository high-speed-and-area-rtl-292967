# Shared-symbol memory-based FIR filter

An FIR filter multiplies every input sample by all of its coefficients.
Because the coefficients are constants, each multiplier can be a lookup table
holding `C * x` for every possible `x`. Built that way, the tables grow with the
number of coefficients and double with every input bit. This design makes the
tables small by **sharing**. It writes every coefficient as a sum of a few
shifted "symbols". It stores only the products of those symbols with the input,
in one small dual-port ROM. Each coefficient's product is then rebuilt from the
ROM outputs with shifts, a short carry-save adder (CSA) tree and one
carry-propagate adder (CPA).

The multiplier structure follows the GOSM ("global optimal symbol match")
method for high-speed, area-minimised memory-based FIR filters on FPGAs. The
alphabet and the coefficient decompositions are chosen offline by an optimiser
(enumeration plus integer linear programming). They reach this RTL as
parameters. The RTL then checks them and builds the hardware they describe.

```
            x (IN_W bits)
            |
   +--------+-------------------------+
   | low half a        high half b    |      stage 1: memory
   v                   v              |
 [ port A    symbol_rom    port B ]   |  x_q (registered x, for S1)
   | q_a = {S_k * a}   | q_b = {S_k * b}
   +---------+---------+--------------+
             |  wire shifts           |      stage 2: logic, per coefficient
      coef_mult[0] ... coef_mult[NCOEF-1]   (supports -> csa_tree -> CPA)
             |
       prod[i] = C_i * x
             |
      fir_tap_chain (transposed form)        y(n) = sum s_i |C_i| x(n-i)
```

## Symbols, fragments and matches

These terms are the key to reading the RTL.

* A **symbol** `S` is a binary number whose MSB and LSB are both 1, e.g.
  `1011` (S11) or `100101` (S37). `S1` is the number 1.
* A **fragment** `F(S, s)` is a symbol shifted left by `s` bits.
* A **match** of a coefficient `C` is a set of fragments that sum to `C`, with
  no overlapping one bits. The number of one bits of the fragments adds up to
  the number of one bits of `C`.
* The **alphabet** is the set of symbols that all the matches use.

The default configuration is this worked example, with 8-bit input samples:

| coefficient | match                   | supports |
|-------------|-------------------------|----------|
| 11          | F(S11,0)                | 2        |
| 23          | F(S11,1) + F(S1,0)      | 3        |
| 45          | F(S37,0) + F(S1,3)      | 3        |
| 125         | F(S37,0) + F(S11,3)     | 4        |
| 187         | F(S11,4) + F(S11,0)     | 4        |

Only S11 and S37 are stored, because `S1 * x` is `x` itself. Five multipliers
thus share one 16-word x 18-bit ROM, 288 bits in all. An odd-multiple table per
coefficient needs 400 bits for the same set. The saving grows with the number
of coefficients, because coefficients keep reusing the same few symbols.

## Memory partition and the symbol ROM (`symbol_rom`)

The input `x` of `IN_W` bits is cut into a low half `a` and a high half `b` of
`H = IN_W/2` bits each. Then `S*x = S*a + (S*b << H)`. Both halves need the same
table, so a single **dual-port** ROM of `2^H` words serves both: port A is
addressed by `a`, port B by `b`.

Word `i` holds `S_k * i` for every stored symbol, side by side. Symbol 0 sits in
the least significant bits. Each field is just wide enough for
`S_k * (2^H - 1)`. For {S11, S37} with `H = 4` that is 8 + 10 = 18 bits. The
function `mcm_pkg::sym_offset` gives the layout. The table is computed at
elaboration from `SYMS`, so no data file is needed:

    ROM[i][sym_offset(k) +: sym_prod_w(S_k)] = S_k * i,   0 <= i < 2^H

The read is synchronous, as in FPGA block RAM. Both ports register their word
on a clock edge with `en = 1`.

## Supports, the CSA tree and the depth bound D (`coef_mult`, `csa_tree`)

Each fragment becomes one or two addends, called **supports**:

* `F(S1, s)` gives `x << s`: one support.
* `F(S_k, s)` gives `(S_k*a) << s` and `(S_k*b) << (s+H)`, read from ports A and
  B: two supports.

All of these are wires, so no shifter exists in hardware. The supports enter
the tree in ascending order of width, so the narrowest share the first
compressors. `csa_tree` reduces them with rows of 3:2 compressors (`csa32`,
one full adder per bit), level by level, until two words remain. A CPA (`+`)
then adds those two words.

The number of CSA levels sets the delay of stage 2. The parameter `D` bounds
it. A tree of at most `D` levels takes at most `NumSup_max(D)` supports:

| D | 1 | 2 | 3 | 4 |
|---|---|---|---|---|
| NumSup_max | 3 | 4 | 6 | 9 |

The default is `D = 2`. `coef_mult` refuses at elaboration (`$error`) any match
that:

* does not sum to its coefficient,
* has overlapping fragments, or
* needs more supports than `NumSup_max(D)`.

The delay of stage 1 is one memory read, whatever the coefficients are. The
critical path is therefore one ROM read, at most `D` full adders and one CPA.
There is no shifter and no address encoder.

## The filter (`fir_tap_chain`, `gosm_fir`)

The filter is in transposed form. Every tap adds its product to the registered
partial sum of the next tap:

    z[NTAPS-1] <= s*p[NTAPS-1];   z[i] <= z[i+1] + s*p[i];   y = z[0]

Here `s = -1` for taps flagged in `TAP_NEG`, and `s = +1` otherwise. The
critical path does not depend on the number of taps.

* `TAP_COEF[t]` selects which of the `NCOEF` distinct coefficient magnitudes tap
  `t` uses. This way the two halves of a symmetric filter share one MCM path.
* The MCM block works on magnitudes only. Negative coefficients are subtracted
  in the chain.

## Interface and timing

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous, active-low reset: clears the tap chain and the valid flags |
| `in_valid` | in | 1 | `x` is a new sample |
| `x` | in | `IN_W` | unsigned sample |
| `out_valid` | out | 1 | `y` is a new output |
| `y` | out | `IN_W+COEF_W+clog2(NTAPS)+1` | signed filter output |

* There are two register stages: the ROM read, and the tap chain.
* A sample taken on clock edge `t` produces its `y` on edge `t+1`. `out_valid`
  is high in that same cycle.
* At most one sample is accepted per clock. When `in_valid` is low the whole
  pipeline holds. Gaps are allowed.
* `mcm_block` can also be used alone. Its products appear one edge after the
  sample, flagged by its `out_valid`.

## Describing another coefficient set

Build the alphabet with `syms8(...)` (up to 8 symbols, or fill a `sym_list_t`
by index for up to 64). Build each match with
`frags(frag_mem(k, shift), frag_one(shift), ...)`, with up to 6 fragments per
match. Set `IN_W` even, `COEF_W` to the coefficient word length, and `D` to the
depth bound. For example, the pair {11, 23} on a 10-bit input with the single
stored symbol S11 is:

```systemverilog
import mcm_pkg::*;
localparam int unsigned C [2] = '{11, 23};
localparam frag_list_t  M [2] = '{frags(frag_mem(0, 0)),
                                  frags(frag_mem(0, 1), frag_one(0))};
localparam int unsigned T [2] = '{0, 1};
gosm_fir #(.IN_W(10), .COEF_W(5), .NSYM(1), .SYMS(syms8(11)),
           .NCOEF(2), .COEF(C), .MATCH(M), .D(2),
           .NTAPS(2), .TAP_COEF(T)) u_fir (...);
```

This builds a 32 x 9-bit ROM. Pass array parameters through named
`localparam`s, as above. Some tools size an inline `'{...}` by the default
parameter length.

Filters with 14- or 16-bit coefficients (tens to hundreds of taps) fit within
these limits: about 10 to 15 stored symbols and at most 4 supports per
coefficient at `D = 2`. You still need the coefficient values and an optimiser
to pick the matches.

## Files

| file | content |
|------|---------|
| `rtl/mcm_pkg.sv` | fragment and list types, layout and tree-depth functions, the default example |
| `rtl/symbol_rom.sv` | dual-port symbol-product ROM |
| `rtl/csa32.sv` | one row of full adders (3:2 compressor) |
| `rtl/csa_tree.sv` | CSA tree of any number of addends |
| `rtl/coef_mult.sv` | one coefficient: supports, CSA tree, CPA, match checks |
| `rtl/mcm_block.sv` | ROM + input register + all coefficient paths |
| `rtl/fir_tap_chain.sv` | transposed adder/delay chain with signed taps |
| `rtl/gosm_fir.sv` | the filter (top) |

## Verification

Each testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|-----------|---------------|
| `tb_symbol_rom` | every word on both ports, one-cycle read, hold when disabled, 18-bit word |
| `tb_csa_tree` | trees of 1 to 7 addends against the plain sum, level counts |
| `tb_coef_mult` | all five example coefficients times all 256 inputs |
| `tb_mcm_block` | example set (8-bit) and {11,23} on 10 bits, random gaps, one-cycle latency, ROM sizes |
| `tb_mcm_depth` | coefficient 125 with `D = 1` (S31, 3 supports) and `D = 3` (S1 only, 6 supports, no ROM) |
| `tb_fir_tap_chain` | random products, negative taps, gaps, reset, against a reference convolution |
| `tb_gosm_fir` | the filter at its default parameters, end to end: every input value, random data, gaps, full-scale samples, two mid-stream resets, exact latency; counts each event and fails if one never happened |
| `tb_gosm_fir_sym` | 9-tap symmetric filter {11,-23,45,125,187,125,45,-23,11}: shared products and subtracting taps |

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl rtl/mcm_pkg.sv \
        tb/tb_gosm_fir.sv --top-module tb_gosm_fir -o sim && obj_dir/sim

Every testbench runs in seconds.

## Where this RTL departs from the original design, and how far to trust it

* **Taken from the original design:**
  * the two-stage structure (a symbol-product memory, then a CSA tree and a
    CPA per coefficient),
  * the split of the input into two halves over one dual-port memory,
  * S1 taken straight from the input,
  * the symbol, fragment and match rules,
  * the depth bound `D` with 3 supports at `D = 1`,
  * the worked example and its 16 x 18 memory,
  * the transposed FIR form,
  * the synchronous ROM read.
* **This design's own choices:**
  * the register placement: the input is registered beside the ROM address,
    stage 2 is combinational, and the tap chain registers follow;
  * the `in_valid` handshake and the reset behaviour;
  * unsigned samples;
  * signed coefficients, handled by subtraction;
  * the tap-to-coefficient map;
  * all word widths (products `IN_W+COEF_W`, output wide enough to never
    overflow);
  * the symbol field order in the ROM word;
  * `NumSup_max` of 4 and 6 for `D` = 2 and 3, derived from 3:2 tree depth;
  * all addends of the CSA tree are carried at full product width. Synthesis
    trims the constant bits; the original area model sizes each compressor
    explicitly.
* **Not included:**
  * The optimiser that chooses alphabets and matches. It is software, and its
    result is what you pass as parameters.
  * The benchmark filters of 14- and 16-bit coefficients. Their coefficient
    values are not published with the method, so they are not part of the
    tests.
  * No timing or area on an FPGA has been measured for this RTL.
* **Trust:** every module is checked against independently computed values,
  and each testbench has been shown to fail on a deliberately broken copy of
  its module. The default configuration is exercised exhaustively over all
  8-bit inputs.
