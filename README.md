# Bit-serial systolic divider and inverter for GF(2^m)

This RTL computes the quotient C = A / B mod G in the binary field GF(2^m), and in a
second, smaller array the inverse C = 1 / B mod G. Elements use the standard
(polynomial) basis. Operands go in and results come out one coefficient per clock,
most significant coefficient first. A new operation can start every m clocks. The
result's MSB leaves the array 4m-4 clocks after the operands' MSB entered, so one
operation spans 5m-4 clock cycles from its first input bit to its last output bit.

Each array is a one-way chain of 2m-2 identical cells. A cell holds a fixed
handful of flip-flops and gates whatever m is: 21 flip-flops in the divider cell,
18 in the inverter cell. Area therefore grows as O(m). That is the point of the
design: for the field sizes used in cryptography (m in the hundreds or thousands),
bit-serial arrays with O(m^2) area become impractical. The default size is m = 8.

## The algorithm: Euclid with a fixed iteration count

The textbook Euclid inversion loops until the remainder is zero, so its iteration
count depends on the data. The variant used here always runs exactly 2m-2
iterations. Its working variables are:

- **R, S:** a remainder pair. R starts as B, and S starts as G. S always has degree
  exactly m.
- **T, U, V:** cofactors. U starts as A (or 1 for an inverse); T and V start at 0.
- **state** and **count:** state starts at 0 and count starts at 0.

Each iteration does the following:

1. Multiply R by x and T by x (T reduced mod G). Let r_m be the new x^m
   coefficient of R.
2. In state 0, count goes up by one. If r_m = 1, then:
   - R = R + S, and S takes the old (shifted) R;
   - T = U, and state becomes 1.
3. In state 1, count goes down by one. If r_m = 1, then R = R + S and T = T + U.
   If count has reached 0:
   - U becomes T + V, and V takes the old U;
   - state returns to 0.

After 2m-2 iterations U holds A / B mod G. In state 0, count measures how far R is
still below S in degree. In state 1, it counts the steps left to cancel that
difference.

For an inverse, U starts at 1. The reduction of T by G can also be dropped: the
coefficient shifted out above x^(m-1) is simply discarded. This is what makes the
inverter cell smaller.

The cells use three control signals, all fixed at the start of each iteration:

| signal | condition | effect |
|--------|-----------|--------|
| Ctrl1 | state = 0 and r_m = 1 | swap: R = R+S, S = x·R, T = U, state → 1 |
| Ctrl2 | r_m = 1 | R = R+S; in state 1 also T = T+U |
| Ctrl3 | state = 1 and the count reaches 0 | U = T+V, V = U, state → 0 |

## How one iteration becomes one bit-serial cell

Each basic cell (`gf2m_div_cell`, `gf2m_inv_cell`) carries out one iteration for
every word that streams past it. This section explains how.

**Framing.** A single control line `ctl` travels with the data. It carries the
repeating sequence 0 1 1 … 1: the 0 marks the MSB slot of each word. Every other
line is also one bit wide, and the bundle between two cells is a packed struct
(`div_link_t` or `inv_link_t` in `gf2m_pkg`):

| line | content |
|------|---------|
| `r`, `s` | R and S, MSB first. The x^m term of S is always 1 and is not sent. |
| `t`, `u`, `v` | cofactors T, U, V |
| `g` | g_(m-1) … g_0 of the field polynomial (divider only) |
| `f` | count as a one-hot flag: a 1 in slot j-1 means count = j, for j = 1 … m |
| `cz` | count = 0 (constant over the word) |
| `st` | state (constant over the word) |

**Decisions are made in the first slot.** r_m is the MSB of the incoming R word.
t_(m-1), which decides the reduction of T, is the MSB of the incoming T word. The
count flag for count = 1 also sits in the first slot. So everything that controls an
iteration is known as soon as a word's first slot arrives. In that clock the cell
loads four enable flip-flops: r_m (this is Ctrl2), t_(m-1), state, and Ctrl3 =
state & f. It holds them for the rest of the word. Ctrl1 is formed from them as
(state = 0) & Ctrl2.

**Multiplying by x is a one-slot shift.** Output coefficient k of x·R needs input
coefficient k-1, which arrives one clock after coefficient k of S, U, V and G. The
cell therefore registers `s`, `u`, `v`, `g` and `ctl` once on the way in. It
combines them with the live `r`, `t` and `f` inputs, and registers every output.
Every line comes out exactly two clocks after it went in, so the array's 2m-2 cells
add 4m-4 clocks.

**Zero fill at the LSB end.** While the last slot of a word is being formed, the
live `r`, `t` and `f` inputs already carry the next word's MSB. At that point `ctl`
is 0, and three AND gates with `ctl` substitute the zeros that belong below the LSB:
r_(-1), t_(-1), and "no count flag above slot m-1". The next word's MSB still reaches
the control flip-flops unmasked.

**The count needs no adder.** Counting up moves the one-hot flag one slot towards
the LSB. Counting down moves it one slot towards the MSB. In hardware this is one
multiplexer between the flag delayed by two clocks (slot k-1) and the live flag
(slot k+1). In the MSB slot, counting up takes its input from the `cz` line, so a
count of 0 becomes 1. When Ctrl3 fires, the flag leaves through the top and the cell
raises `cz` for the next cell. The flag never goes past slot m-1, because the count
never exceeds m.

**The slot formulas.** For output slot k, with primes marking inputs already
aligned to slot k:

```
r'  = (r_live & ctl) ^ (Ctrl2 & s)
s'  = Ctrl1 ? (r_live & ctl) : s
t'  = Ctrl1 ? u : ((t_live & ctl) ^ (t_(m-1) & g) ^ (Ctrl2 & state & u))
u'  = Ctrl3 ? (t' ^ v) : u
v'  = Ctrl3 ? u : v
f'  = state ? (f_live & ctl) : (first slot ? cz : f delayed two clocks)
st' = state ^ (Ctrl1 | Ctrl3)      cz' = Ctrl3
```

**Inverter cell.** `gf2m_inv_cell` drops the `g` line, the t_(m-1) flip-flop and
the reduction term. The constant U = 1 has its only 1 in the last (LSB) slot, which
is exactly the clock in which the live `ctl` input shows the next word's 0. The first
cell of the inverter array (parameter `UNIT_U = 1`) therefore takes u = ~ctl in
place of its registered U input.

## Using the arrays

`gf2m_div_array #(M)` has these ports:

- `clk`, `rst_n` (asynchronous, active low);
- `ctl_in`, `a_in`, `b_in`, `g_in`;
- `c_out`, `ctl_out`.

`gf2m_inv_array #(M)` has the same ports without `a_in`. `gf2m_euclid_top #(M = 8)`
places both arrays side by side with separate `div_*` and `inv_*` ports; they share
only the clock and reset.

Driving and reading the arrays:

- In every clock, apply one coefficient of each operand, MSB first.
  - `g_in` carries g_(m-1) … g_0 of G(x) = x^m + …; the x^m term is implied.
  - `ctl_in` is 0 in the MSB slot and 1 in the other slots.
- Operations may follow each other back to back, and G may differ from one
  operation to the next.
- `ctl_in` must keep its 0 1 1 … 1 pattern running for at least one slot after the
  last operation. The last slot of every word is closed by the next 0, and the
  inverter's constant 1 also comes from that 0.
  - Both arrays contain an assertion (`a_frame`) that flags any 0 on `ctl_in` not
    followed by exactly M-1 ones and then the next 0.
- If the MSB of an operation is applied in cycle 0, `c_out` presents the result's
  MSB in cycle 4M-4, with `ctl_out` = 0 in that cycle, and the LSB in cycle 5M-5.

Operands must satisfy B ≠ 0, and G must be irreducible of degree M. Otherwise the
output has no meaning; nothing flags this. After reset, every data flip-flop is 0
and every `ctl` flip-flop is 1. Output slots before the first real word are
meaningless, and `ctl_out` tells where real words begin.

## Files

| file | content |
|------|---------|
| `rtl/gf2m_pkg.sv` | link structs between cells |
| `rtl/gf2m_div_cell.sv` | divider basic cell |
| `rtl/gf2m_inv_cell.sv` | inverter basic cell |
| `rtl/gf2m_div_array.sv` | chain of 2M-2 divider cells |
| `rtl/gf2m_inv_array.sv` | chain of 2M-2 inverter cells |
| `rtl/gf2m_euclid_top.sv` | both arrays, M = 8 |
| `tb/gf2m_ref_pkg.sv` | word-level reference: one iteration, the full algorithm, a shift-and-add multiplier, an irreducibility test |
| `tb/gf2m_array_check.sv`, `tb/gf2m_wide_check.sv` | stimulus and checkers for one array (the wide one works for any M) |
| `tb/tb_*.sv` | testbenches |

## Verification

Every testbench ends by printing `TB_RESULT checks=… failures=…` and has a watchdog.

- **`tb_gf2m_div_cell`, `tb_gf2m_inv_cell`:** 400 random iteration states, streamed
  back to back through one cell. Every slot of every output line is compared with
  one iteration of the word-level reference (3200 checks).
- **`tb_gf2m_div_array`, `tb_gf2m_inv_array`:** M = 8, 3 and 13 at the same time,
  with 300, 100 and 200 back-to-back operations, each with its own random
  irreducible G.
  - The first operations are corner cases: B = 1, B = x^(M-1), A = 0, A = B, and
    B = G − x^M.
  - Every output bit and frame marker is checked.
  - Every result is also checked as C·B = A with an independent multiplier.
  - The latency must be exactly 5M-4.
- **`tb_gf2m_euclid_top`:** the top at its default size.
  - The inverter gets all 255 nonzero B for each of four random fields.
  - The divider gets 1020 random divisions at the same time.
  - Checks cover every bit, the 36-cycle latency, and that every mechanism
    occurred: swap, R+S, U/V update, reduction of T by G, and the count reaching M.
- **`tb_gf2m_field_sizes`:** both arrays at m = 8, 12, 16, 32, 50, 80 and 100.
  Each size uses a fixed low-weight irreducible trinomial or pentanomial and runs
  four operations, checked bit by bit, by multiplication and for latency.
- **`tb_gf2m_m1000`:** the same for both arrays at m = 1000, with
  G = x^1000 + x^5 + x^4 + x^3 + 1. Two operations run, with a latency of 4996
  cycles. m = 300 and 500 have not been simulated.

All of these pass. To run one with plain Verilator:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/gf2m_pkg.sv tb/gf2m_ref_pkg.sv tb/tb_gf2m_euclid_top.sv \
    --top-module tb_gf2m_euclid_top
./obj_dir/Vtb_gf2m_euclid_top
```

`tb_gf2m_m1000` builds about 4000 cell instances, and Verilator needs one to two
minutes to compile it.

## What is interpretation rather than specification

The iteration, the control equations, and the adder-free one-hot count with its
c-zero indication are taken from the published design. So are the latched
broadcast of the per-iteration controls, the three zero-filling AND gates, the cell
count, the framing sequence, the MSB-first output, and the throughput and latency
figures. The following are this implementation's own choices:

- **Register placement inside the cell.** The placement here (two registers per
  cell on every line) was chosen so that the latency comes out at the stated 5m-4.
  It is not claimed to be gate-for-gate the published cell, but the totals come
  close. At the usual unit costs (latch 8, mux and XOR 6, AND 4,
  inverter 2 transistors), the divider cell counts about 298 transistors against
  the 304 per cell implied by the published estimate. The inverter cell saves 40
  transistors (one multiplexer, one AND, three flip-flops, one XOR), exactly the
  published difference.
- **State and c-zero travel on word-long lines.** They pass from cell to cell on
  lines held for the whole word, which costs one line more than strictly needed.
- **Inputs are MSB first.** Only the output order was stated. MSB-first input is
  the order that makes r_m and t_(m-1) available first.
- **The inverter's constant U = 1** is derived from the framing line in the first
  cell.
- **Reset.** There is an asynchronous active-low reset. The storage elements are
  edge-triggered flip-flops where the original speaks of latches and delay
  elements.
- **The field polynomial** only has to be irreducible, not primitive.

Not included: the pads and physical implementation of the GF(2^8) prototype chip,
and the two-dimensional dependence graphs from which the arrays were derived. The
graphs are a derivation aid, not hardware of this design.
