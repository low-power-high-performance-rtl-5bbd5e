# SPST radix-4 Booth multiplier (16 x 16, signed)

A multiplier spends much of its dynamic power on transitions that do not
change the result. When an operand is small, the upper Booth partial products
are zero and the upper bits of many additions are pure sign extension, yet in
an ordinary multiplier those bits still toggle whenever the inputs or the
carries change. The *spurious power suppression technique* (SPST) adds a
little detection logic that recognises these cases and forces the inputs of
the idle hardware to zero, so that it stops switching; the correct upper bits
are then rebuilt from two control bits instead of being computed.

This repository holds synthesizable SystemVerilog for such a multiplier: a
16 x 16 two's-complement radix-4 modified-Booth multiplier whose Booth
encoder and adder tree are both equipped with SPST, producing a registered
32-bit product every clock cycle.

## Datapath

```
            A (16)                 B (16)
              |                      |------------------+
              v                      v                  v
   +---------------------------------------+    +---------------+
   |  spst_booth_encoder                   |<---| booth_detect  |
   |   pp_candidates: +A +2A -A -2A        |    | close1 close2 |
   |   8 x booth_enc + booth_pp_sel        |    +---------------+
   +---------------------------------------+
     PP0 PP1   PP2 PP3   PP4 PP5   PP6 PP7      (18 bits each)
       \ /       \ /       \ /       \ /
       [+]       [+]      [S+]      [S+]        20 bits   [S+] = spst_adder
          \      /           \      /
            [+]                [S+]             24 bits
               \              /
                     [+]                        32 bits
                      |
                  product register  -> p
```

* **Booth recoding.** B is cut into eight overlapping three-bit groups
  {B[2x+1], B[2x], B[2x-1]} (with B[-1] = 0). Each group becomes a digit in
  {-2, -1, 0, +1, +2}: 000 and 111 give 0, 001 and 010 give +1, 011 gives +2,
  100 gives -2, 101 and 110 give -1. Row x of the product is digit x times A,
  weighted by 4^x, so eight rows replace sixteen.
* **Candidates and rows.** One generator forms +A, +2A, -A and -2A for all
  rows. Each row has its own encoder and a multiplexer that picks the
  candidate for its digit (0 when no select line is high). In front of the
  multiplexers of rows 4 to 7 sits a bank of AND gates, the "latch", that can
  force the candidate bus to zero.
* **Adder tree.** The rows are added pairwise: PP[2k] + 4 * PP[2k+1] (20
  bits), then pairs of those with a shift of 4 (24 bits), then a final add
  with a shift of 8 (32 bits). Every operand is sign-extended to its adder's
  width, so each node is a plain two-operand adder. The three adders on the
  PP4..PP7 side are SPST adders; the other four are ordinary.

## Closing Booth rows

A Booth digit is zero exactly when its three bits are equal. Rows 6 and 7 are
therefore zero when B[15:11] is all zeros or all ones, and rows 4 to 7 when
B[15:7] is. `booth_detect` looks at B alone and drives two signals:

| signal | low when | closes |
|--------|----------|--------|
| close1 | B[15:11] uniform | latches of rows 6 and 7 |
| close2 | B[15:7] uniform  | latches of rows 4 and 5 |

A close signal is *high while the part is in use* and low when it is closed,
which is the polarity an AND-gate latch wants. Since B[15:7] uniform implies
B[15:11] uniform, rows 6-7 are always closed when rows 4-5 are. A closed row
outputs zero, which is what its digit would have produced anyway, so closing
never changes the product; it only keeps A's transitions away from those
multiplexers and from the adders below them. A small B, positive or negative
(-128 <= B < 128 closes all four upper rows), is the common case in DSP data.

## The SPST adder

`spst_adder` is the heart of the technique and the least obvious part. The
W-bit addition is split into a least significant part (LSP, 8 bits) that
always computes and a most significant part (MSP, W - 8 bits).

If each operand's MSP is all zeros or all ones, the operands are small
numbers in sign-extended form. Treating an all-ones MSP as -1, the MSP of the
result can only be

    -a_and - b_and + c_lsp   in {-2, -1, 0, +1}

where a_and (b_and) says that A's (B's) MSP is all ones and c_lsp is the
carry out of the LSP. Such a value is written as a row of sign bits with one
free bit at the bottom: -2 = 1..10, -1 = 1..11, 0 = 0..00, +1 = 0..01. The
detection logic (`spst_detect`) computes, with a_nor meaning "MSP all zeros":

```
idle      = (a_and | a_nor) & (b_and | b_nor)
carr_ctrl = (c_lsp ^ a_and ^ b_and) & idle           // bottom bit
sign      = ~c_lsp & (a_and | b_and) | c_lsp & a_and & b_and
close     = ~idle & close_clk                         // 1 = MSP in use
```

When `close` is low, AND gates force both MSP operands and the MSP carry-in
to zero, so the MSP adder stops switching, and the sign-extension stage
outputs {sign, ..., sign, carr_ctrl} as the upper part of the sum. When
`close` is high the MSP adder's own result ("pseudo-sum") is used. The carry
out is the MSP adder's when open and a_and & b_and | (a_and | b_and) & c_lsp
when closed.

Worked cases at 16 bits (8 + 8), all checked by `tb_spst_adder`:

| operands | MSPs | c_lsp | predicted MSP |
|----------|------|-------|---------------|
| -61 + 51 = -10 | 1s, 0s | 0 | 11111111 |
| -196 + 204 = 8 | 1s, 0s | 1 | 00000000 |
| -61 + -205 = -266 | 1s, 1s | 0 | 11111110 |
| -196 + -52 = -248 | 1s, 1s | 1 | 11111111 |
| 200 + 100 = 300 | 0s, 0s | 1 | 00000001 |

Used on its own, the module defaults to the 16-bit, 8/8 split adder and
also subtracts: `sub = 1` gives a - b - cin by inverting B and the carry in
(the detection logic sees the inverted B). Inside the multiplier it is used
at 20 and 24 bits with `sub` and `cin` tied low.

## The close_clk strobe

Detection is combinational and so glitches while its inputs settle; a
glitching close signal would itself waste the power it is meant to save.
Every close signal (close1, close2 and the close of each SPST adder) is
therefore ANDed with an external strobe, `close_clk`. While the strobe is
low, every suppressible part is closed; when it rises, the parts that are
needed open. Because the strobe is only an AND input, it may rise as early
as the system likes after the operands change; there is no minimum delay to
respect, only that the outputs must have settled before the product is
sampled.

The consequence for the user: **`close_clk` must be high at the rising edge
of `clk` that captures the product.** While it is low, the multiplier output
is the result with all suppressible parts closed, which is wrong whenever
those parts were needed. Tying `close_clk` high is legal and keeps all the
data-dependent closing, giving up only the glitch filtering. The testbench
pulls it low 1 ns after each rising edge of `clk` (10 ns period), together
with the new operands, and raises it 2 ns later.

## Interface and timing (`spst_booth_mult`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk | in | 1 | product register clock |
| rst_n | in | 1 | asynchronous active-low reset of the product register |
| close_clk | in | 1 | SPST assertion strobe (see above) |
| a | in | 16 | multiplicand, two's complement |
| b | in | 16 | multiplier, two's complement, Booth-recoded |
| p | out | 32 | registered product a * b |
| part_open | out | 5 | {rows 6-7, rows 4-5, SPST adder S1[2], S1[3], S2[1]}: 1 = computing, 0 = inputs held at zero |

The path from `a`, `b` to the register is combinational: operands applied in
one cycle appear on `p` after the next rising edge, one product per cycle.
`part_open` is combinational from the current operands and strobe; it is
there for activity measurements and tests.

Shared sizes and types (operand width, row width, tree widths, Booth select
struct, candidate struct) live in `spst_mult_pkg`. The tree's structure is
written for eight rows, so N = 16 is the only supported operand width.

## Where this design departs from the original description

* **Row width 18, not 17.** The original tree is drawn with 17-bit partial
  products. A 17-bit two's-complement row cannot hold -2A for A = -32768
  (+65536), so every row and candidate here is 18 bits. The widths of the
  tree (20, 24, 32) are unchanged and the product is exact for all inputs.
* **Candidate multiplexer rather than XOR selector.** The original also shows a
  partial-product selector that XORs |A| or |2A| with the digit's sign and
  adds the sign as a separate bit. This design takes the other form it
  describes, five precomputed candidates and a multiplexer, and folds the
  negation into the candidates.
* **Polarity of close.** The original equations give close as the
  "closable" condition, while its prose and gate drawing treat close = 0 as
  "closed". The RTL follows the prose: 1 = in use.
* **SPST adder MSP width.** In the tree, each SPST adder's MSP covers the
  operand bits above the 8-bit LSP plus the sign-extension bits up to the
  adder's output width (12 and 16 bits) instead of only the operand bits (9
  and 12). The sum is identical.
* **Choices made where the description is silent:** two's-complement
  operands (implied by the all-ones detection), one-cycle latency with a
  single output register, asynchronous reset of that register, a zero digit
  (group 111) carrying no sign, the subtract input of `spst_adder`, the
  carry-out logic of a closed SPST adder, and the `part_open` port.
* **Not included:** the register-based variant of the assertion circuit, which
  the AND-gate strobe replaces, and the conventional array multiplier that
  the design is compared against. Power and delay figures cannot be
  reproduced from RTL and are not claimed.

## Verification

Each module has a self-checking testbench in `tb/` that compares against
values computed independently in the testbench (integer arithmetic, digit
recoding written out separately) and prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| tb_booth_enc | all eight groups against -2*g2 + g1 + g0 |
| tb_booth_detect | close1 / close2 against digits recoded in the testbench, strobe low |
| tb_pp_candidates | +-A, +-2A for edge and random A, including -32768 |
| tb_booth_pp_sel | every digit, row open and closed |
| tb_spst_detect | close, carr_ctrl, sign against the arithmetic prediction |
| tb_spst_adder | the worked cases above, 5000 random add/subtract, MSP gated while the strobe is low |
| tb_spst_booth_encoder | every row = digit * A; forced closing zeroes rows 4-7 only |
| tb_pp_adder_tree | sum of PPx * 4^x for 5000 random row sets, each SPST adder seen closed and open |
| tb_spst_booth_mult | full-size end to end, see below |
| tb_spst_activity | products and transition counts on the gated nets for three operand streams, see below |

`tb_spst_booth_mult` runs the top at its default size: reset value,
0x2AC9 * 0x006A = 0x0011B73A, 3 * 3 = 9, the extreme products
(-32768 * -32768 and so on) and 20000 random pairs with B often small, one pair
per cycle. It checks every product with one-cycle latency and full
throughput, checks that all parts are closed while `close_clk` is low, and
fails unless rows 6-7, rows 4-5 and each of the three SPST adders were seen
both closed and open at a sampling edge.

## How much switching is removed

`tb_spst_activity` feeds the full-size multiplier three streams of 4000
operations each and, at every sampling edge, counts the bits that changed on
the nets SPST gates (the candidate buses of rows 4-7 behind their latches and
the MSP operands of the three SPST adders), next to the same count for the
ungated versions of those nets. This is a zero-delay count of settled values,
so it says nothing about glitches within a cycle, and it covers only the gated
parts, not the whole multiplier. A typical run:

| stream | operands | transitions gated / ungated |
|--------|----------|-----------------------------|
| small  | signal below 200 x coefficient below 100 | 0 / 235072 |
| mixed  | full-range A x coefficient below 100 | 0 / 560464 |
| random | full-range A x full-range B | 715165 / 716985 |

With a small Booth-encoded operand, rows 4-7 are zero and every gated part
stays closed, so none of its inputs move. With full-range random data the
technique has almost nothing to remove; the test also checks that, summed
over the stream, gating does not add transitions.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl rtl/spst_mult_pkg.sv \
    tb/tb_spst_booth_mult.sv --top-module tb_spst_booth_mult -Mdir obj
./obj/Vtb_spst_booth_mult
```

Replace the testbench name to run any other one. Verilator finds the other
modules in `rtl/` through `-Irtl`; the package must be listed first.
