# Vedic-multiplier MAC and multimode MAC

Fixed-point multiply-accumulate (MAC) units with one idea at their core. The
multiplier is a Vedic "vertically and crosswise" (Urdhva Tiryakbhyam) tree. Every
addition in it, and the accumulation after it, goes through one fast adder: a
hybrid of a Brent-Kung prefix adder and a carry-select adder (HBK-CSLA).
On top of that multiplier the design builds two MACs:

* **I-MAC**: a 2N-bit MAC (`sum <= sum + a*b`), default 64-bit (32x32 multiplier).
* **Multimode MAC**: one 64-bit datapath that runs as one of three MACs, chosen
  by a 2-bit code:

  | `sel` (S1 S0) | operation                                   | sum width |
  |---------------|---------------------------------------------|-----------|
  | `00`          | `sum += A*B` (32x32)                         | 64        |
  | `01` or `10`  | `sum += AL*BL + AH*BH` (two 16x16 products) | 64        |
  | `11`          | `sum = (sum + AL*BL) mod 2^32` (16x16)      | 32        |

  Here `A = AH:AL` and `B = BH:BL` are the 16-bit halves. The multimode MAC comes
  unpipelined (`mm_mac`) and as a two-stage pipeline (`mm_mac_pipe`).

All operands are unsigned integers. All sums wrap around at their width.

## The Adjusted Vedic multiplier (`adjusted_vm`)

This part is the hardest to follow, so it gets the most room here.
An NxN multiplication splits each operand into halves of H = N/2 bits. That gives
four H x H partial products, each N bits wide:

```
q0 = AL*BL   q1 = AH*BL   q2 = AL*BH   q3 = AH*BH
a*b = q0 + (q1 + q2) * 2^H + q3 * 2^N
```

Each partial product is made by a smaller `adjusted_vm`, recursively, down to
the 2x2 leaf `vm2x2`. That leaf has four AND gates and two half adders. The
product is then assembled in three column groups:

```
bits [H-1:0]      q0[H-1:0]                        (passes straight through)
bits [N+H-1:H]    middle = q0[N-1:H] + q1 + q2 + q3[H-1:0]
bits [2N-1:N+H]   q3[N-1:H] + carries out of the middle
```

* The middle columns hold four N-bit vectors. The vector `{q3[H-1:0], q0[N-1:H]}`
  fills them exactly. A 3:2 carry-save adder (`csa`) reduces the four vectors to
  a sum S and a carry C. An HBK-CSLA then adds `S + 2*C` to give the middle N
  product bits. For N = 4 this adder is 3 bits wide, because `S[0]` needs no
  addition.
* The middle columns can carry out twice:
  * C1 is the carry-save adder's top carry `C[N-1]`.
  * C2 is the HBK-CSLA carry out.

  Both have weight 2^(N+H). For N = 4 at most one of them is ever 1. Their OR
  drives a 2-bit increment-by-1 converter (`inc_by1`) on `q3[3:2]`. For N >= 8
  **both can be 1**: in an 8x8 multiply, 111 * 222 is the first case. An OR
  would then drop a carry of 2^(N+H). So this design **adds** the carries. The
  top H bits come from two chained H/2-bit HBK-CSLAs (two 8-bit adders at
  N = 32). The first adder takes C1 as its second operand and C2 as its carry in.

The default is N = 32. N = 4, 8, 16 and 32 are the sizes the design targets.
N must be a power of two; elaboration stops with an error otherwise. Each
multiplier is one combinational path.

## The HBK-CSLA adder (`hbk_csla`, `bk_adder`)

`hbk_csla #(W)` computes `a + b + cin` and returns the sum and a carry out.

* The low `ceil(W/2)` bits form one Brent-Kung prefix adder (`bk_adder`). The
  Brent-Kung tree builds carries in two passes: an up-sweep, then a down-sweep.
* The high bits are computed twice, by two more Brent-Kung adders: once for a
  carry in of 0 and once for 1.
* The low half's carry out selects which high result to use.

It is used at widths 3, 8, 32 and 64. The exact "enhanced" Brent-Kung variant
and the split point are this implementation's choice. Any correct adder can
replace it without changing behaviour elsewhere.

## I-MAC (`imac`)

`imac #(N)` multiplies with `adjusted_vm #(N)` and accumulates with
`hbk_csla #(2N)` into a 2N-bit register.

* **Timing:** on each rising clock edge with `start = 1`, `sum` takes
  `sum + a*b`. With `start = 0` it holds.
* **Reset:** `rst_n` is asynchronous and active low. It clears the sum.
* **Sizes:** N = 4, 8, 16 and 32 give the 8-, 16-, 32- and 64-bit MACs.

## Multimode MAC (`mm_mac`, `mm_mac_pipe`)

The datapath has four stages of logic, each in its own module:

1. **`mode_ctrl`**, the control-logic circuit. It turns `sel` into two enables:
   * `E1 = ~S0 & ~S1` (true only for `00`).
   * `E2 = ~(S0 & S1)` (true for every code except `11`).

   It also produces one operand enable per multiplier, all gated by `start`:
   * multiplier 0 (AL*BL) is always on;
   * the middle multipliers (AH*BL, AL*BH) need E1;
   * multiplier 3 (AH*BH) needs E2.

   A multiplier that is not needed sees zero operands and does not toggle.
2. **`mm_mult_array`** holds the four 16x16 Adjusted Vedic multipliers and their
   operand gating. The gating is AND gates. The original concept uses tri-state
   buffers, but on-chip tri-states are not synthesizable logic.
3. **`mm_product`** turns the partial products into one 64-bit product word.
   * In mode `00` it assembles the 32x32 product the same way as
     `adjusted_vm #(32)`: a 32-bit carry-save adder, a 32-bit HBK-CSLA, and two
     8-bit HBK-CSLAs for the top bits. A multiplexer passes C1 and C2 only in
     this mode.
   * In mode `01`/`10` the 32-bit HBK-CSLA is fed `AL*BL` and `AH*BH` instead.
     Its 33-bit result is the sum of the two products.
   * In mode `11` the word is just `AL*BL`.

   An output multiplexer picks the word for the current mode.
4. **`mm_accum`** is a 64-bit HBK-CSLA and the accumulator register. In mode
   `11` it keeps only the low 32 bits of the adder and writes zero to the upper
   half.

The accumulator is **not** cleared when the mode changes. Changing from a
64-bit mode to mode `11` therefore keeps the low 32 bits of the running sum and
drops the upper half. Reset with `rst_n` to start a new sum.

### Timing

The two versions differ only in latency. Both accept a new operation on every
clock.

| version       | pipeline register                                 | an operation sampled at edge k is in `sum` |
|---------------|---------------------------------------------------|--------------------------------------------|
| `mm_mac`      | none                                              | after edge k                               |
| `mm_mac_pipe` | after the four 16x16 multipliers (partial products, mode, valid) | after edge k+1              |

In the pipelined version the mode travels with its partial products, so `sel`
may change on every cycle. The pipeline cut sits after the multipliers. That
splits the path into the 16x16 multiply and the reduce-and-accumulate step,
which are of similar length.

## Top level (`vedic_mac_top`)

The top holds three independent units side by side:

* the 64-bit I-MAC, with ports `imac_*`;
* the unpipelined multimode MAC, with ports `mm_*`;
* the pipelined multimode MAC, with ports `mmp_*`.

They share only `clk` and `rst_n`. Shared types and widths live in
`vedic_pkg`: the mode enum, the control struct and the partial-product array.

## Where this RTL departs from the original description

* **Carries C1 and C2 are added, not OR-ed.** The original ORs them for every
  size. That is exact only for 4x4. For 8x8 and wider it gives wrong products,
  for example 111 * 222 at 8x8. The multimode datapath makes the same change.
* **Mode `01`/`10`.** The original describes this mode two ways: as
  accumulating "the sum of dual 16x16 multiplications", and as having the 32-bit
  carry-save adder and the 32-bit middle adder disabled. These do not fit
  together. This RTL follows the first description, `sum += AL*BL + AH*BH`, and
  reuses the 32-bit middle adder to sum the two products.
* **E1/E2 polarity.** One passage gives `E1 E2 = 00` for mode `00`. This RTL
  follows the equations `E1 = ~S0 & ~S1` and `E2 = ~(S0 & S1)`, which the
  descriptions of the other two modes agree with.
* **Operand gating** uses AND gates instead of tri-state buffers.
* **Left open by the original, chosen here:**
  * the placement of the pipeline register;
  * the internals of the HBK-CSLA;
  * asynchronous active-low reset;
  * wrap-around on overflow;
  * unsigned operands;
  * clearing the upper half of the sum in mode `11`.
* **I-MAC worked example.** Its printed total, 202862040, is not the sum of its
  five products. The correct total is
  20*35 + 325*77 + 2345*1111 + 10000*20000 + 98*2340 = 202860340, and that is
  what the tests check.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The testbenches check:

* **Combinational blocks:** `vm2x2`, `inc_by1`, and `adjusted_vm` at 4x4 and
  8x8 are checked exhaustively. `adjusted_vm` at 16x16 and 32x32, `csa` and
  `hbk_csla` get random and edge-case vectors: all ones, long carry chains, and
  the double-carry case.
* **Sequential blocks** are compared with a model after every clock edge.
* **Worked examples:**
  * `tb_imac` runs the I-MAC five-product example on the 64-bit I-MAC. It also
    runs random traffic on the 8-, 16-, 32- and 64-bit I-MACs side by side.
  * `tb_mm_mac` and `tb_mm_mac_pipe` run the multimode mode-`00` example, which
    sums to 623321.
  * The pipelined test also checks that the last product arrives exactly one
    edge later.
* **`tb_vedic_mac_top`** runs all three MACs at full size. It covers both
  examples and 12,000 cycles of random traffic. It counts, and fails if it never
  sees:
  * each `sel` code;
  * a mode change;
  * an idle cycle;
  * 64-bit and 32-bit wrap-around;
  * the upper half cleared by mode `11`;
  * a mode change while an operation is in the pipeline;
  * 32x32 operands whose middle columns carry 2.

To run one test with Verilator, for example the full-size end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/vedic_pkg.sv tb/tb_vedic_mac_top.sv --top-module tb_vedic_mac_top
./obj_dir/Vtb_vedic_mac_top
```

All testbenches run in about a second each. To use another size, change the
`N` or `W` parameter of `adjusted_vm`, `imac`, `csa`, `hbk_csla` or `inc_by1`.
The multimode MAC is fixed at 32-bit operands by `vedic_pkg::MM_OPW`, and its
product assembly assumes that size.
