# RPDT adder: a 24-bit adder that switches off its upper part

In signal-processing datapaths most operands are small. A 24-bit word then
carries a long run of sign bits at the top, and adding those runs is wasted
switching: the upper bits of the result are predictable, but a plain adder
still computes them and passes glitches on to the next stage.

The RPDT (robust power downgrading technique) adder splits the word into two
parts:

* a **least significant part (LSP)**, bits 15..0, which is always computed.
  Here it is a sparse-4 parallel-prefix adder for modulo 2^16+1 arithmetic on
  diminished-1 operands;
* a **most significant part (MSP)**, bits 23..16, with its own ordinary adder.
  When both upper operand bytes are pure sign extensions (all zeros or all
  ones), the MSP adder is fed zeros and stops switching. Its result is then
  rebuilt from two bits held in a register, `sign` and `carr_ctrl`.

The split at 24 = 8 + 16 bits is the main configuration. Both widths are
parameters.

## What the adder computes

Take the carry of the lower halves, `c = (A[15:0] + B[15:0] >= 2^16)`. Then:

```
sum[15:0]  = A[15:0] + B[15:0] + (not c)      mod 2^16
sum[23:16] = A[23:16] + B[23:16] + c          mod 2^8
cout       = carry out of the line above
```

The lower half is **not** the low half of a binary sum. It is the
diminished-1 sum of a modulo 2^16+1 adder. A value X in [1, 2^16] is stored as
X-1. The sum of two such values is stored the same way: sum[15:0] + 1 equals
(X + Y) mod 65537. The carry that the MSP receives, `c_lsp`, is the plain
carry-out of A[15:0] + B[15:0], before the end-around correction. The upper
byte is therefore an ordinary two's-complement sum of the upper bytes plus
that carry.

The value zero falls outside the diminished-1 range. It would need a separate
zero flag, and none is built. The adder adds only; there is no subtract
control.

## Switching off the MSP

### When the MSP result is predictable

Suppose each upper operand byte is either all zeros or all ones. The MSP sum
then always has the form "seven copies of one bit, then one more bit":

| A_MSP | B_MSP | C_LSP | MSP sum    | sign | carr_ctrl | cout |
|-------|-------|-------|------------|------|-----------|------|
| 00    | 00    | 0     | `00000000` | 0    | 0         | 0    |
| 00    | 00    | 1     | `00000001` | 0    | 1         | 0    |
| FF/00 | 00/FF | 0     | `11111111` | 1    | 1         | 0    |
| FF/00 | 00/FF | 1     | `00000000` | 0    | 0         | 1    |
| FF    | FF    | 0     | `11111110` | 1    | 0         | 1    |
| FF    | FF    | 1     | `11111111` | 1    | 1         | 1    |

This gives:

```
sign      = (A_and & B_and) | ((A_and ^ B_and) & ~C_LSP)
carr_ctrl = A_and ^ B_and ^ C_LSP
```

Here `A_and` means "A_MSP is all ones". These six rows cover every situation
in which a plain adder would toggle MSP carries that do not change the result.
For example, -61 + (-205) gives an MSP byte of `11111110`, with `carr_ctrl = 0`
in the lowest MSP bit.

### The pieces (`msp_adder`)

* **`detection_logic`** forms the all-ones and all-zeros flags of each
  operand. `close` goes low when both operands are sign extensions. The unit
  also computes `sign` and `carr_ctrl`, both forced to 0 while the MSP is
  open. All three are **registered** on `close_clk`.
* **`msp_operand_latch`** (one for A, one for B) passes the operand while
  `close = 1` and drives zeros while `close = 0`. It holds no value: an old
  operand held at the adder input would leak into the pseudo-sum, which the
  sign-extension unit ORs into. The carry from the LSP is gated the same way.
* **`msp_ordinary_adder`** produces the pseudo-sum `PS`. While the MSP is
  closed, `PS` is zero.
* **`sign_ext_unit`** ORs `sign & ~close` into PS bits 7..1 and `carr_ctrl`
  into PS bit 0.
* **Carry out** is `adder_cout | (A_and & B_and) | ((A_and ^ B_and) & C_LSP)`.
  Each extra term implies a true carry-out even when the MSP is open, so the
  three terms can be ORed without looking at `close`.

### Timing of the decision

The datapath is combinational. The only state is the three detection
registers. They sample the operands and `c_lsp` at the rising edge of
`close_clk`, so glitches while the operands settle never reach the MSP
control. The protocol is:

1. Apply A and B.
2. After the next rising edge of `close_clk`, the result is valid.
3. If the new operands need the same decision (`close`, `sign`, `carr_ctrl`)
   as the one held, the result is valid at once, without waiting for the edge.

Until that edge, a stale decision gives a wrong MSP byte. For example: the
MSP is closed and the new operands need it open, or they need a different
`sign`.

`rst_n` is an asynchronous active-low reset. It opens the MSP (`close = 1`,
`sign = carr_ctrl = 0`), which is correct for any operands.

## The LSP: sparse modulo 2^16+1 adder (`sparse_mod_adder`)

A modulo 2^n+1 adder on diminished-1 operands is an n-bit adder whose
carry-in is the **inverted** carry-out of the same addition. A chain built
literally that way would be a combinational loop. The prefix formulation
avoids the loop. Write (G_{i:j}, P_{i:j}) for the group generate and
propagate of bits i..j, with P the OR-propagate. The carry out of bit i is
then

```
c_i = G_{i:0} + P_{i:0} · not(G_{n-1:i+1}),      c_{-1} = not(G_{n-1:0})
```

The adder has three stages:

1. **Pre-processing** (`preproc_cell`): H = A xor B, G = A and B,
   P = A or B for each bit.
2. **Sparse carry tree.** Only the carries into each 4-bit block
   (c_{-1}, c_3, c_7, c_11) are computed:
   * `prefix_black_cell` operators build each block's (G, P): pairs first,
     then groups of four;
   * a Kogge-Stone prefix over the four blocks gives (G, P)_{4k+3:0};
   * a matching suffix gives G_{15:4k};
   * one `prefix_gray_cell` per block carry applies the formula above:
     the lower group's G and P, plus the complemented G of the group above.
3. **Carry-select blocks** (`cs_block`): each holds two ripple-carry
   candidate sums, one for block carry-in 0 and one for 1. The block carry
   selects one. Sum bits are S_i = H_i xor C_{i-1}.

`N` (16) must be a multiple of `CS_W` (4), and `CS_W` must be a power of two.
An assertion checks this at elaboration.

## Files and hierarchy

```
rpdt_adder                 top: LSP + MSP, ports a, b, sum, cout, c_lsp, close, sign, carr_ctrl
├── sparse_mod_adder       LSP, N = LSP_W
│   ├── preproc_cell       × N
│   ├── prefix_black_cell  block trees, block prefix and suffix
│   ├── prefix_gray_cell   one per block carry above block 0
│   └── cs_block           × N/4
└── msp_adder              MSP, W = MSP_W
    ├── detection_logic
    ├── msp_operand_latch  × 2
    ├── msp_ordinary_adder
    └── sign_ext_unit
rpdt_pkg                   gp_t (generate/propagate pair), default widths
```

| Parameter | Module                          | Default | Meaning                      |
|-----------|---------------------------------|---------|------------------------------|
| `MSP_W`   | `rpdt_adder`                    | 8       | MSP width                    |
| `LSP_W`   | `rpdt_adder`                    | 16      | LSP width (modulo 2^LSP_W+1) |
| `N`       | `sparse_mod_adder`              | 16      | operand width                |
| `CS_W`    | `sparse_mod_adder`, `cs_block`  | 4       | carry-select block width     |
| `W`       | MSP modules                     | 8       | MSP width                    |

## Simulating

Each testbench in `tb/` checks its results itself and ends with a line
`TB_RESULT checks=N failures=M`. To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/rpdt_pkg.sv tb/tb_rpdt_adder.sv --top-module tb_rpdt_adder -o sim
./obj_dir/sim
```

| Testbench              | What it checks |
|------------------------|----------------|
| `tb_rpdt_adder`        | The whole 24-bit adder at its default sizes, against an integer model. Covers the five sign-extension situations with their known MSP results, corner cases, and 100 000 random operand pairs biased towards sign-extension bytes. It requires every closed class, the open MSP, both mode switches, results taken before the edge with the decision held, and LSP sums with and without the +1 correction. |
| `tb_rpdt_fig1_cases`   | A 16-bit configuration (8 + 8) on the five classic 16-bit cases: -128+192, -61+51, -196+204, -61-205, -196-52. |
| `tb_sparse_mod_adder`  | N = 8 exhaustively. N = 16 on corner cases plus 200 000 random pairs, including the modular identity (S*+1 = (X+Y) mod 65537). |
| `tb_msp_adder`, `tb_detection_logic` | Clocked checks of the MSP and its decision: registered hold between edges, asynchronous reset, and zero operands at a closed adder. |
| the others             | Exhaustive or random checks of each cell. |

Two concurrent assertions guard the invariants the MSP relies on. A closed
MSP adder sees and produces only zeros (`msp_adder`). `sign` and `carr_ctrl`
are 0 while the MSP is open (`detection_logic`). Build with `--assert` to
enable them.

The testbenches use no x/z states. All state is reset or driven before it is
read.

## Departures and open points

* **Word split.** The main design is 24 bits wide with an 8-bit MSP. The
  spurious-transition analysis and the sign-extension unit drawing use a
  16-bit word split at bit 8 (bits PS15..PS8 there correspond to 23..16
  here). That configuration is `MSP_W = 8, LSP_W = 8`.
* **Carry tree wiring.** The reference sparse-4 tree reaches the block
  carries through its own arrangement of black and gray operators, with
  inverted wrap-around connections. This design computes the same four
  carries through a Kogge-Stone prefix/suffix and one gray operator per
  carry. The logic function is identical. Depth and operator count may
  differ.
* **Gray operator.** The reference cell also carries a third signal (T) and
  an inverted P input from the upper group. Their function is not defined, so
  only the carry output c = G_V + P_V · not(G_L) is built.
* **Operand isolation.** The "latches" force zeros rather than hold data.
  The OR-based sign-extension unit needs a zero pseudo-sum.
* **Signals the source leaves open.** The reset state, the value of
  `sign`/`carr_ctrl` while the MSP is open, the CS block insides and the MSP
  adder architecture are this design's own choices.
* **Not built.** Zero handling for diminished-1 operands, a subtract mode,
  and the LSP's external carry-in. The carry-select adder has no carry input,
  so the LSP takes none.
* **Power and timing.** The power saving and the FPGA delay and area numbers
  are physical results. A functional simulation does not show them.
  Observing the switched-off MSP needs a toggle-count or power flow.
