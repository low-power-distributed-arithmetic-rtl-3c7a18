# Low-power distributed-arithmetic FIR filter

A 4-tap FIR filter, y(n) = w0·x(n) + w1·x(n-1) + w2·x(n-2) + w3·x(n-3), built
without a multiplier. Instead of multiplying each sample by its weight, the
filter walks through the samples one bit position at a time. At each position
the four sample bits form an address into a small table of pre-computed weight
sums, and a shift-accumulator adds that word at the right power of two. This
is distributed arithmetic (DA). Offset binary coding (OBC) halves the table to
8 words. The one adder in the datapath is a ripple carry adder built from a
full-adder cell written as compound (complex) gates. That cell is the
low-power part of the design.

Default configuration: 4 taps, 4-bit two's complement samples, 8-bit two's
complement weights, 14-bit output. The filter produces one output every 4
clock cycles.

## The arithmetic

This is the part that needs the most care. Everything below is in integers.

A B-bit two's complement sample x with bits b_j can be written with digits
d_j = 2·b_j − 1, each +1 or −1:

    x = ½ · ( Σ_{j<B-1} d_j·2^j  −  d_{B-1}·2^{B-1}  −  1 )

Substituting this into the filter sum and collecting by bit position j gives

    2·y = Σ_j  s_j · 2^j · Q(j)  +  P,      P = −(w0 + w1 + w2 + w3)
    Q(j) = Σ_k w_k · d_{k,j}                (d_{k,j}: digit j of x(n−k))
    s_j = −1 for the sign bit j = B−1, +1 otherwise

Q(j) depends only on the four digits at position j, so it can be looked up.
Flipping all four digits negates Q. So only the 8 patterns in which the
newest sample's digit d_0 is +1 are stored, and the others are their
negations:

    word[a] = w0 + Σ_{k=1..3} (bit (3−k) of a ? +w_k : −w_k)
    word[000] = w0 − w1 − w2 − w3,  ...,  word[111] = w0 + w1 + w2 + w3

The table stores twice the usual OBC value ½·Q, so every word is an integer.
The final result is halved once instead.

For bit position j, with A0..A3 the bits of x(n)..x(n−3):

* address bit A'k = Ak XNOR A0 (k = 1..3; A'1 is the MSB). When A0 = 0 this
  selects the complementary pattern.
* negate = (NOT A0) XOR S0. The word is negated once when A0 = 0 and once
  more for the sign bit. S0 is high for j = B−1.

## Datapath and timing

```
 x_in ─► x[n] ─► x[n-1] ─► x[n-2] ─► x[n-3]      (da_sample_delay)
          │ bit j  │          │          │
          A0       A1         A2         A3
          │        └──── XNOR A0 ───────┘
          │                 │ A'1 A'2 A'3
          │             8-word table  (obc_lut)
          │                 │
  S0 ─ XOR ─► negate ─► invert, carry-in 1
                            │
            ┌──► lp_rca (12 bit) ◄── S1 ? P : acc >>> 1
            │           │
            │       acc register ──► low bits catch the dropped LSBs
            └───────────┘
```

`da_control` runs j = 0, 1, 2, 3, LSB first. On j = 0 (S1) the accumulator
starts from P instead of from its own shifted value. Each cycle computes

    acc ← (j == 0 ? P : acc >>> 1) + (negate ? −word : word)

Negation is the inverted word plus a carry-in of 1 into the adder. After four
cycles, {acc, low} = 2·y exactly, where low is a 3-bit register that catches
each LSB the right shift drops. Without that register the result would be
rounded. y = {acc, low} >>> 1 is latched on the last cycle.

Timing, with the handshake below:

| cycle after the edge that accepts sample n | activity |
|---|---|
| 1 | j = 0, S1: start from P |
| 2, 3 | j = 1, 2 |
| 4 | j = 3, S0: sign bit. `in_ready` is high, so sample n+1 can be taken here |
| 5 | `y_valid` pulses, y = y(n) (held until the next output) |

A continuous stream gives one output every 4 cycles.

### Widths

| quantity | width | reason |
|---|---|---|
| table word | 11 | \|w0 ± w1 ± w2 ± w3\| ≤ 512 |
| accumulator and adder | 12 | the running value stays within ±2047 |
| output y | 14 | \|y\| ≤ 4 · 8 · 128 = 4096 (reached by x = −8, w = −128) |

The widths follow from TAPS, XW and WW (see `da_fir_pkg`). The testbench
covers the extreme cases.

## The low-power full-adder cell

`lp_full_adder` uses compound gates rather than a chain of small gates and
stand-alone inverters:

    h    = (a | b) & ~(a & b)        OR-AND  (a xor b)
    sum  = (h | cin) & ~(h & cin)    OR-AND  (h xor cin)
    cout = (a & b) | (h & cin)       AND-AND-OR

In silicon the benefit comes from taller transistor stacks, which leak less,
and from fewer internal nets and glitches. A synthesis tool may re-map these
expressions, so the cell structure only survives if it is kept, for example
by instantiating library complex cells. Functionally `lp_rca` is an ordinary
ripple carry adder: sum = a + b + cin mod 2^WIDTH. Its default width of 8 is
the stand-alone adder size. The filter uses a 12-bit instance.

## Interface of `da_fir_top`

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; synchronous active-low reset (clears samples, table, P, output) |
| in_valid / in_ready | in / out | 1 | sample handshake; a sample is taken when both are high |
| x_in | in | 4 | sample, two's complement |
| lut_we, lut_waddr, lut_wdata | in | 1, 3, 11 | write one table word |
| pinit_we, pinit_wdata | in | 1, 11 | write P = −(w0+w1+w2+w3) |
| y_valid | out | 1 | one-cycle pulse with each new output |
| y | out | 14 | output, two's complement |

Set-up: compute the 8 words and P from the weights with the formulas above,
then write them (one per cycle) while no output is pending. New weights apply
to the samples already in the delay line. The filter does not flush them.

## Where this design makes its own choices

The structure follows the published OBC-DA filter with the low-power adder:
the delay line, the XOR addressing, the half-size table, the sign select by
S0, the p_initial select by S1, and the accumulator with ×½ feedback. The
following are choices made here:

* **Integer scaling, doubled table words, and the low-bit catch register.**
  These keep the output exact. A version with only a ×½ feedback would drop
  bits.
* **Sign of the offset term.** The offset −½·Σw is *added*, which is what the
  derivation gives. One common way of writing the final formula subtracts a
  term named p_initial, which would be wrong with this definition.
* **Table loading.** The table and P are register files written through ports.
  How pre-computed contents get into the table is left open by the
  architecture.
* **Control.** The valid/ready handshake, the one-cycle `y_valid`, and the
  synchronous reset.
* **Cell grouping.** The Boolean grouping inside the full-adder cell. The
  architecture only asks for compound cells of the AND-AND-OR and OR-AND kind.
* **Bit selection.** Bit j is selected from the stored samples by a
  multiplexer, rather than by shifting the sample registers.

What is not reproduced: the area, delay and power advantages. In the
reference 65 nm implementation the low-power cell saves about 24 % area and
29 % power on an 8-bit adder, and about 5 % area and 11 % power on the whole
filter. These are cell-library effects that RTL simulation cannot show. The
plain DA filter with a 16-word table and the conventional adder, which served
as comparison points, are not included.

## Files

| file | content |
|---|---|
| `rtl/da_fir_pkg.sv` | default sizes and derived widths |
| `rtl/lp_full_adder.sv` | compound-gate full-adder cell |
| `rtl/lp_rca.sv` | ripple carry adder of those cells |
| `rtl/da_sample_delay.sv` | sample delay line with bit-j output |
| `rtl/obc_addr_gen.sv` | OBC address and negate logic |
| `rtl/obc_lut.sv` | 8-word table of weight sums |
| `rtl/da_shift_acc.sv` | sign select, adder, shift-accumulator, output register |
| `rtl/da_control.sv` | bit counter, S0/S1, handshake, output strobe |
| `rtl/da_fir_top.sv` | the filter |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. For example, the
end-to-end test of the filter:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/da_fir_pkg.sv tb/da_fir_top_tb.sv --top-module da_fir_top_tb
    ./obj_dir/Vda_fir_top_tb

It runs at the default size. It streams 6000 random samples under 40 weight
sets, including the extreme ones, with random gaps and back-to-back bursts.
Each output is compared with a direct convolution, and the testbench checks
the 4-cycle latency and 4-cycle rate. It also counts that every mechanism
occurs: the S1 start, the S0 sign cycle, both causes of negation and their
cancelling, back-to-back and idle accepts, and table reloads. The adder and
the full-adder cell are tested exhaustively. The other modules are checked
against reference models, cycle by cycle.

To change the configuration, override `TAPS`, `XW` or `WW` on `da_fir_top`.
The table then has 2^(TAPS−1) words, and the derived widths follow. Only the
4/4/8 configuration has been simulated. XW must be at least 2.
