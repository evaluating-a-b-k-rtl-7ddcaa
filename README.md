# Constant-time "A + B = K" detection

Deciding whether `A + B` equals some value `K` normally means doing the
addition, waiting for the carry to ripple (or look ahead) across all `n`
bits, and then comparing. This design answers the question **without ever
forming the sum**. Each bit position checks its own bit of `K`, assuming that
every lower bit already matches. All bit positions work in parallel, and a
single n-input NOR combines their answers. The depth is two XOR levels plus
one NOR, whatever the width. The area is one small cell per bit.

The detector sits inside an ALU. There it gives branch conditions such as
"result is zero" or "loop counter reached its limit" before the adder has
finished. This removes the wait that a conditional branch would otherwise
have on the ALU result.

## The predicted carry

With `p_i = a_i ^ b_i` and `g_i = a_i & b_i`, a ripple adder computes

    c_i = (p_i & c_{i-1}) | g_i        r_i = p_i ^ c_{i-1}

`c_i` depends on every lower bit, and that dependence is what makes an
adder slow. The detector replaces the true carry with a **predicted carry**
that uses only local signals:

    q_i = (p_i & ~k_i) | g_i           (q_0 = carry-in)
    z_i = p_i ^ q_{i-1} ^ k_i          local mismatch
    eq  = NOR(z_n .. z_1)

Why `~k_i` may stand for `c_{i-1}`: if the sum bit is correct (`r_i = k_i`),
then `k_i = p_i ^ c_{i-1}`. When `p_i = 1` this means `c_{i-1} = ~k_i`. So
`q_i = c_i` whenever bit `i` of the sum equals `k_i`.

The claim is that `eq = 1` exactly when `A + B = K`. The proof goes by
induction from the bottom bit:

* Bit 1 uses the real carry-in, so `z_1 = r_1 ^ k_1`.
* Suppose every bit below `i` reports no mismatch. By induction those bits
  all equal `K`. Then `q_{i-1}` is the true carry, so `z_i = r_i ^ k_i`.
* Suppose instead some lower bit reports a mismatch. Then `eq` is already
  0, whatever `z_i` says.

So a wrong predicted carry can only occur above a bit that already
mismatches. It can never hide a mismatch and never create a false match.

The derivation never uses `p = a ^ b` or `g = a & b`. The result therefore
holds for **any** propagate/generate pair. This is why the detector can take
its inputs from the ALU's operand modifier: one detector then serves
addition, subtraction, increment and the logic operations ("A op B = K").

## Blocks

| Module | Role |
|---|---|
| `akb_cell` | One bit: `q_i` and `z_i` from `p_i, g_i, k_i, q_{i-1}`. |
| `akb_detector` | `N` cells plus the NOR line; `K` is an input. |
| `akb_kconst_detector` | The same detector for a constant `K` (parameter); each cell shrinks to one gate plus one XOR. |
| `omu` | Operand modifier unit: `(a, b, op, cin)` → `(p, g, c0)`. |
| `pg_adder` | Carry-recurrence adder on `(p, g, c0)` → `r`, `cout`. |
| `rlimit_reg` | The `R_limit` register holding the loop bound; its bits are `K`. |
| `akb_alu_top` | The ALU: OMU, adder, zero detector, `R_limit` detector, NEXT decision. |
| `akb_pkg` | The operation enum `alu_op_e`. |

### Constant K

When `K` is known at design time, each cell simplifies:

| `k_i` | `q_i` | `z_i` |
|---|---|---|
| 0 | `p_i \| g_i` | `p_i ^ q_{i-1}` |
| 1 | `g_i` | `~p_i ^ q_{i-1}` |

The top uses this form with `K = 0` as the zero detector.

### The ALU (`akb_alu_top`)

```
 a, b, op, cin ──► omu ──► p, g, c0 ──┬──► pg_adder ──────────────► r, cout
                                      ├──► akb_kconst_detector(K=0) ──► zero
 limit_we, limit_d ─► rlimit_reg ─K─► └──► akb_detector ─────────► limit_match
                                                        │
                        op == OP_NEXT && !limit_match ──┴──────────► next_taken
```

Both detectors read the same `p, g, c0` bus as the adder. Their outputs are
therefore valid a constant number of gate delays after the OMU, while `r` is
still settling.

**Operations** (`akb_pkg::alu_op_e`):

| op | result | how the OMU forms it |
|---|---|---|
| `OP_ADD` | a + b | p = a^b, g = a&b, c0 = 0 |
| `OP_ADC` | a + b + cin | as ADD, c0 = cin |
| `OP_SUB` | a − b | b inverted, c0 = 1 |
| `OP_SBB` | a + ~b + cin | b inverted, c0 = cin |
| `OP_NEXT` | a + 1 | b replaced by 0, c0 = 1 |
| `OP_AND`/`OR`/`XOR` | a op b | p = a op b, g = 0, c0 = 0 (adder passes p through) |

`zero` and `limit_match` are correct for every operation, including the logic
ones.

**Loop closing with NEXT.** A counted loop `do i = 1, n` compiles to:

```
    Ri     <- 1
    Rlimit <- n + 1
do: ...body...
    NEXT Ri, do          ; Ri <- Ri + 1; branch to do if Ri != Rlimit
```

Here `i <= n` has been rewritten as `i != n + 1`. That turns the ordered
comparison into an equality test, which the detector can resolve early. For
NEXT, the register holding `Ri` drives `a` with `op = OP_NEXT`. The ALU
returns `r = Ri + 1` to be written back. It also returns
`next_taken = (Ri + 1 != R_limit)`, and `next_taken` is known before `r` is.

**Timing.** Everything except `rlimit_reg` is combinational. `R_limit` takes a
new value on the rising edge of `clk` when `limit_we = 1`. The asynchronous
active-low `rst_n` clears it to 0.

## Parameters

Every module has `N` (operand width), default **32**.
`akb_kconst_detector` also has `K` (default 0). The detector idea itself
works for any width. The 32-bit default matches the execution-unit class of
ALU this structure comes from.

## What is this design's own choice

The detector equations, the constant-K simplification, where the detectors
sit in the ALU, the `R_limit` register and the NEXT semantics follow the
original description. The following are choices made here:

* **Carry-in.** The original formulation assumes carry-in 0 (`q_0 = 0`). Here
  `q_0` is the ALU's carry-in `c0`. With `c0 = 0` the two are identical. With
  `c0 = 1` the argument above still holds, and this is what lets subtraction
  and increment use the detector.
* **The NOR line.** The original uses a precharged wired-NOR line. Each cell
  has one pull-down transistor on it. In RTL this is the reduction `~|z`.
  Whether it runs in constant time then depends on how it is implemented;
  synthesis will build a tree of depth `log n`.
* **The operation set and its encoding** are not specified by the original
  work. This also applies to putting logic results on `p` with `g = 0`.
* **Both detectors in one ALU.** The zero detector and the `R_limit` detector
  were shown as two separate applications. Here they share the same p/g bus.
* **The adder** is the plain carry recurrence; synthesis may restructure it.
  It has no zero line of its own, because the early detector replaces it.
* **Outside this design:** the register file holding `Ri`, the branch unit
  that acts on `zero` / `next_taken`, and the pipeline. Relations with zero
  (`< 0`, `>= 0`, ...) also need the sign bit of the tested operand, which is
  taken straight from that operand and not from the ALU.
* `rlimit_reg`'s reset value (0) and write port.

## Verification

Each module has a self-checking testbench in `tb/` (`<module>_tb.sv`). Each
prints `TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog
if it hangs.

* `akb_cell_tb`: all 16 input combinations.
* `akb_detector_tb`: exhaustive at N = 4 (every a, b, K and carry-in). At
  N = 32 it runs random operands with K steered to hit, narrowly miss (one
  bit flipped) or randomly miss the sum. A third part uses arbitrary p/g
  pairs against a bit-serial reference, and a fourth repeats the random test
  at N = 64.
* `akb_kconst_detector_tb`: all 16 constants exhaustively at N = 4; K = 0 and
  a mixed pattern at N = 32.
* `omu_tb`: every operation; the p/g/c0 it produces, summed bit by bit, must
  equal the operation's result.
* `pg_adder_tb`: exhaustive at N = 4; random and full-carry-chain cases at
  N = 32.
* `rlimit_reg_tb`: reset, write and hold cycles, and reset in the middle of
  a cycle.
* `akb_alu_top_tb` runs at the default width with no parameter overrides.
  It applies 8,000 random operations against random `R_limit` values and
  checks `r`, `cout`, `zero`, `limit_match` and `next_taken`. It then runs
  `do i = 1, n` for n = 1, 2, 7, 100 and 1000, with NEXT, and checks that
  the body runs exactly n times. It counts how often each mechanism
  occurred: early zero, limit match, `R_limit` write, NEXT taken, NEXT
  falling through, and each operation. A mechanism that never occurs counts
  as a failure. Two clocked assertions inside `akb_alu_top` also require
  `zero` and `limit_match` to agree with the adder result `r` on every clock.

Simulation cannot show the constant-time property itself. The testbenches
check the logical function, and the depth follows from the structure.

## Running

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/akb_pkg.sv tb/akb_alu_top_tb.sv --top-module akb_alu_top_tb
./obj_dir/Vakb_alu_top_tb
```

Replace the testbench file and the top module name to run another block's
test. `-y rtl` lets Verilator find the submodules by file name. Name
`akb_pkg.sv` explicitly, because the OMU, the top and their testbenches
import it. To change the width, override `N` on the top; all
submodules follow it.
