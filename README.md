# Single-adder carry-select adder with D-latches (reversible MCML cells)

A carry-select adder gets its speed by computing each block of bits twice,
once assuming a carry-in of 0 and once assuming 1. When the real carry
arrives, a multiplexer picks the right result. The usual cost is a second
ripple-carry adder per block. This design drops the second adder. One
ripple-carry adder per block is used twice in each enable cycle: first
with carry-in 1, and that result is parked in a row of D-latches; then with
carry-in 0. In the second phase the block's muxes choose between the latched
result and the live one.

The cells come from a MOS current-mode logic (MCML) cell set: a "reversible"
full adder with four inputs and four outputs, a D-latch and a 2:1 mux. The
RTL here models these cells at logic level. The electrical side (differential
rails, tail currents, bias voltages) is not modelled.

Two organisations are provided:

* `csla32`: the main 32-bit adder. It is two 16-bit adders (`csla16`), and
  each of those is four 4-bit carry-select blocks.
* `csla16_modified`: a 16-bit adder in five groups. The lowest group is a
  plain 2-bit ripple-carry adder. Above it are carry-select groups of 2, 3, 4
  and 5 bits.

`rmcml_csla_top` holds both side by side, each with its own ports.

## The two-phase enable cycle

Everything hinges on the enable `en`. It is both the latch enable and the
carry input of every block's ripple-carry adder.

| phase   | block adder computes | latches                  | block output (mux)                       |
|---------|----------------------|--------------------------|------------------------------------------|
| en = 1  | a + b + 1            | transparent: capture it  | the carry-in-1 result, whatever `cin` is |
| en = 0  | a + b + 0            | hold the carry-in-1 result | latched result if `cin`=1, live result if `cin`=0 |

How to drive it:

1. Apply `a`, `b` (and `cin`), then raise `en`. The high phase only needs
   to be long enough for one block's ripple and the latch set-up. It can be
   short compared with the low phase.
2. Lower `en`. Keep `a` and `b` stable. The blocks recompute with carry-in 0.
3. Once the carries have passed through the chain of block muxes, `sum` and
   `cout` are valid. They stay valid for as long as `en` is low and the
   operands are held.

One addition takes one enable cycle. While `en` is high, the outputs are not
the sum: each block shows its own a + b + 1. In the low phase a change of
`cin` alone is cheap. The latched half is reused and only the mux selects
move, so the result follows without a new enable cycle. The testbenches
check this.

The latches are level-sensitive and have no reset. Their contents mean
nothing until the first high phase has passed.

## The carry-select block (`csla_block`)

`csla_block #(WIDTH)` is the unit everything else is built from. It holds:

* `rmcml_rca`: a WIDTH-bit ripple of `rmcml_fa` cells, with carry-in = `en`.
* WIDTH + 1 `mcml_dlatch` cells, one per sum bit and one for the carry out,
  all enabled by `en`.
* WIDTH + 1 `mcml_mux2` cells. Each has input `a` = latched value,
  input `b` = live value and select `s` = the block's `cin`.

The critical path from a block's `cin` to its `cout` is a single mux, as in
any carry-select adder. Across the 32-bit adder, the path from `cin` to
`cout` in the low phase is eight muxes in series.

## Cells

* `rmcml_fa`: inputs A, B, C, D; outputs P = carry (majority of A, B, C),
  Q = sum (A ^ B ^ C), R = C, S = D. D is a constant input held at 0. R and S
  are garbage outputs that the adders leave open. As a logic function with
  D = 0, the mapping (A, B, C) to (P, Q, R) is not one-to-one, so the model
  follows the stated output functions and does not try to make the cell
  strictly reversible.
* `mcml_dlatch`: transparent while `clk` is high, holds while low. It has
  outputs `q` and `q_b`.
* `mcml_mux2`: `out = s ? a : b`, plus `out_b`.

The complement outputs are kept because the differential cells provide them.
The complement inputs are not modelled.

## Cascading to 16 and 32 bits (`csla16`, `csla32`)

`csla16 #(BLOCK_WIDTH = 4, NUM_BLOCKS = 4)` chains 4-bit blocks: each
block's `cout` is the next block's `cin`, and all blocks share `en`.
`csla32 #(NUM_SLICES = 2)` chains two `csla16`s the same way. With
`NUM_BLOCKS = 2`, `csla16` is the 8-bit configuration.

## The five-group 16-bit adder (`csla16_modified`)

| group | bits  | kind                 | selected by |
|-------|-------|----------------------|-------------|
| 0     | 1:0   | plain ripple adder on `cin` | –    |
| 1     | 3:2   | csla_block, 2 bits   | c1          |
| 2     | 6:4   | csla_block, 3 bits   | c3          |
| 3     | 10:7  | csla_block, 4 bits   | c6          |
| 4     | 15:11 | csla_block, 5 bits   | c10         |

The groups get wider towards the top because their select carry arrives
later, so a longer ripple inside the group costs nothing. Group 0 has no
latches. Its result is correct even in the high phase. The widths are the
`GROUP_WIDTHS` parameter (default `'{2,2,3,4,5}`, from `csla_pkg`).

## Where this RTL departs from the published design

* **Carry latch.** The published transistor count of a 4-bit block
  (161 = 4 full adders × 20 + 4 latches × 9 + 5 muxes × 9) implies four
  latches per block, for the sum bits only. Holding only the sums leaves the
  carry-out mux with no carry-in-1 carry to select. This RTL adds a fifth
  latch per block for that carry, which costs 9 transistors per block: 1360
  instead of 1288 for 32 bits. The five-group block diagram also shows one
  latch more than each group's width.
* **Mux polarity.** Which mux input `s = 1` selects is not stated in words.
  It is read from the cell schematic, where S switches the current source
  under the A pair.
* **Logic-level cells.** Differential signalling, bias pins (`V`, `Vb`, `Vp`,
  `Vbias`) and the analogue behaviour that makes the design low-power are
  outside RTL. Power, delay and transistor-count figures cannot be
  reproduced from this code.
* **Two 16-bit organisations.** The 4 × 4-bit cascade and the five-group
  layout are both described as the 16-bit adder. The 32-bit adder is built
  from the cascade, and the five-group adder stands beside it.

## Testbenches

Every testbench checks itself against integer arithmetic. Each ends by
printing `TB_RESULT checks=N failures=M`. Each has a watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_rmcml_fa`, `tb_mcml_mux2` | exhaustive truth tables |
| `tb_mcml_dlatch` | follow while high, hold while low, random sequence |
| `tb_rmcml_rca` | 4-bit exhaustive, 9-bit random |
| `tb_csla_block` | 4-bit exhaustive, 5-bit random. Checks the high-phase value, the low-phase sum, a late `cin` flip, and one enable cycle per addition |
| `tb_csla16`, `tb_csla32`, `tb_csla16_modified` | directed carry-ripple and overflow cases plus 2000 random additions. Counts that every block or group saw both carry values |
| `tb_csla_wordsizes` | 8-, 16- and 32-bit configurations in parallel |
| `tb_rmcml_csla_top` | both adders at full size, with a short high phase. Counts each mechanism (latched and direct selection, slice-boundary carry, overflow, late carry, every group carry) and fails if one never occurs |

To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/csla_pkg.sv \
    tb/tb_rmcml_csla_top.sv --top-module tb_rmcml_csla_top -o sim
./obj_dir/sim
```

Every module compiles as a top on its own. All parameters have defaults, and
the defaults are the published sizes.
