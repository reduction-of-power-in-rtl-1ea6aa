# Low-power digit-serial multiplier for GF(2^233)

This is a polynomial-basis multiplier for the binary field GF(2^m), with m = 233.
It is intended as the core operation of elliptic-curve cryptography on
battery-powered devices. It computes C = A·B mod f(x) one k-bit digit of A per
clock cycle. That puts it between a bit-serial multiplier (small but slow) and
a bit-parallel one (fast but large, and it needs very wide I/O).

The design aims at low dynamic power rather than speed or area. Two ideas do
this:

* **Factoring the digit product.** The digit product A_j·B is rewritten so
  that all the logic that depends only on B is separated from the logic that
  depends on the digit A_j. B is held for the whole multiplication. A_j changes
  every cycle. Only the logic behind A_j then switches from cycle to cycle.
* **Gate substitution.** When k is even, the AND gates that form the partial
  products are replaced by NAND gates. These have lower internal power, and the
  result does not change (explained below).

## The iteration

A is split into D = ⌈m/k⌉ digits A_{D-1} … A_0. The top digit is padded with
zeros. The digits are used most significant first:

    C ← 0
    for j = D-1 downto 0:
        C ← (C · x^k mod f)  +  (A_j · B mod f)

Each iteration is one clock cycle. Addition in GF(2^m) is a bitwise XOR.
Multiplying by x is a left shift. If the bit shifted out of position m-1 is 1,
the low terms of f(x) are XORed back in.

The datapath has four parts. Each one is a module:

| part | module | cost |
|---|---|---|
| k × m multiplier, A_j·B mod f | `gf_kxm_mult` | see below |
| constant multiplier, C·x^k mod f | `gf_const_mult` | k XOR gates for the trinomial used here |
| field adder | `gf_field_adder` | m XOR gates |
| register holding C | `gf_acc_reg` | m flip-flops |

The sequencer `gf_digit_ctrl` chooses the digit for each cycle. It also runs
the handshake. `gf_ds_mult_top` connects all the parts.

## Inside the k × m multiplier

The product is computed as A_j·B = Σ_{i<k} a_{j,i} · (B·x^i mod f). This is
done in three stages:

1. **XOR network 1** (`gf_xor_net1`) produces the k words B·x^i mod f,
   i = 0 … k-1. It is a chain of k-1 "CM1" modules (`gf_cm1`). Each CM1
   multiplies by x, so word i comes from word i-1. For a trinomial each CM1 is
   one XOR gate. This network depends only on B, so it does not switch while a
   multiplication is running.
2. **Gate network** (`gf_nand_net`) has k·m two-input gates. Each gate
   combines bit a_{j,i} of the digit with bit n of word i.
3. **XOR network 2** (`gf_xor_net2`) has m balanced XOR trees, one per result
   bit. Each tree has k inputs, so the network has (k-1)·m XOR gates.

The result is already reduced modulo f. No separate reduction step follows.

**Why NAND gates are allowed.** Each result bit is the XOR of k gate outputs.
If every gate output is inverted, the XOR of k inverted bits is the true XOR
when k is even, because the inversions cancel in pairs. So, for even k,
`gf_nand_net` uses NAND gates, and XOR network 2 needs no change. For odd k the
inversions would not cancel, so the module falls back to AND gates. This choice
is made at elaboration time from `K`. A consequence: the `pp` outputs of
`gf_nand_net` are active-low when K is even. Keep this in mind if you probe
them.

## Interface and timing (`gf_ds_mult_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `start` | in | 1 | starts a multiplication if the multiplier is not busy |
| `a`, `b` | in | M | operands; hold them steady while `busy` is high |
| `busy` | out | 1 | iterations are in progress |
| `done` | out | 1 | one-cycle pulse: `c` now holds A·B mod f |
| `c` | out | M | the result; held until the next start |

If `start` is high while the multiplier is idle, the next clock edge clears C
and loads the digit counter with D-1. The D edges after that perform the D
iterations. `done` rises after the D-th of these edges, so it is high during
cycle D counted from the start edge.

* One multiplication therefore takes D+1 cycles. With the defaults (m = 233,
  k = 8, D = 30) that is 31 cycles.
* A new `start` may be given in the cycle in which `done` is high.
* `start` is ignored while `busy` is high.

The operands are read directly from the ports. A goes through a digit
multiplexer, and B feeds XOR network 1. Neither is stored, so only the m
result flip-flops and the small counter are registers. If the source of the
operands cannot hold them, register `a` and `b` outside the multiplier.

## Parameters

| parameter | default | notes |
|---|---|---|
| `M` | 233 | field size |
| `K` | 8 | digit size. Any K ≥ 1 works. An even K enables the NAND substitution |
| `POLY` | bits 74 and 0 | low terms of f(x) = x^233 + x^74 + 1 (bit i = coefficient of x^i) |

Only m = 233 is part of the original design. The digit size, the reduction
polynomial and the handshake are choices made for this implementation:

* k = 8 is an even digit size, so the NAND variant is the one that gets
  built.
* x^233 + x^74 + 1 is the usual irreducible trinomial for this field.

To use another field, set `M` and `POLY` together. `POLY` must describe an
irreducible polynomial x^M + POLY(x). The shared defaults live in `gf_pkg`.

The constant multiplier is written as K steps of "multiply by x". Synthesis
reduces this to wires plus XOR gates. The gate count is k only when the
middle term of the trinomial lies at or below m-k. Other polynomials give a
correct circuit, but with more gates.

## Verification

Every module has a self-checking testbench in `tb/`. They compare against
`tb_gf_ref_pkg`, a plain bit-serial shift-and-add model of GF(2^m) written
separately from the RTL.

* `tb_gf_ds_mult_top` uses the default parameters. It runs 1006
  multiplications: random pairs, plus 0, 1, all-ones and x^232. For each one it
  checks the product, the 30-cycle latency from the start edge to `done`, and
  that the result is held afterwards. It also counts four events and fails if
  any of them never occurred:
  * a back-to-back start;
  * a start ignored while busy;
  * an iteration in which the constant multiplier had to reduce;
  * a non-zero padded top digit.
* `tb_gf_ds_mult_small` runs two other configurations:
  * all 128×128 products in GF(2^7) with f = x^7 + x + 1 and k = 3 (odd k, so
    the AND network);
  * 300 random products in GF(2^233) with k = 7.
* The unit testbenches check the following:
  * each CM1 stage;
  * each output of XOR network 1;
  * NAND for even k and AND for odd k;
  * the XOR trees for k = 8 and k = 5;
  * the k × m multiplier for k = 8 and k = 7;
  * the constant multiplier;
  * the adder;
  * the register's clear/enable priority;
  * the sequencer's digit order and timing.

To run one with Verilator from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/gf_pkg.sv tb/tb_gf_ref_pkg.sv tb/tb_gf_ds_mult_top.sv \
        --top-module tb_gf_ds_mult_top
    ./obj_dir/Vtb_gf_ds_mult_top

Each testbench ends by printing `TB_RESULT checks=N failures=F`. Each has a
watchdog that counts a failure if the simulation hangs. The full-size test
takes about a second.

## What this RTL does not cover

* Power is the quantity the design is built to reduce, and it is not measured
  here. Judging the power claims requires a gate-level, timing-annotated
  simulation with switching-activity capture on a real standard-cell library.
* Gate sizing is not captured. The RTL states NAND gates explicitly, but a
  synthesis tool may re-map them. To keep them, the netlist needs a
  "don't touch" constraint or hand-instantiated cells.
* The critical path delay is not analysed.
