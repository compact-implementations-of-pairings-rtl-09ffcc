# A compact Tate pairing unit over F_2^163

This is a small, slow, low-power hardware unit for the reduced Tate pairing
e(P, Q) on the supersingular curve

    E : y^2 + y = x^3 + x + 1   over F_2^163,   reduction polynomial z^163 + z^7 + z^6 + z^3 + 1

The curve's embedding degree is 4, so the pairing value lies in F_2^652. The
design aims at the smallest possible area and switching activity, not at
speed. With the default single MALU (modular arithmetic logic unit) it has:

- one bit-serial F_2^163 multiplier: a single row of XOR gates plus one
  163-bit accumulator;
- fifteen 163-bit working registers;
- a controller.

A pairing takes about 531,000 clocks. Every higher-level operation is broken
down into F_2^163 additions and multiplications that run one after another on
that single core. This covers the extension-field arithmetic, the curve
arithmetic, the inversions and the final exponentiation. The register file has
no random-access read ports. Values reach the core by swapping neighbouring
registers.

The RTL is technology independent. Clock gating is written as a latch plus an
OR gate.

## The computation

**Miller loop.** The group order is l = 2^163 + 2^82 + 1. Its binary expansion
has only three ones, so Miller's algorithm runs 163 iterations, i = 162 down
to 0. Each iteration has three parts:

1. Square the accumulator F (an element of F_2^652).
2. Double the point V, with V starting at P:
   - λ = xV^2 + 1
   - x2V = λ^2
   - y2V = λ (x2V + xV) + yV + 1
3. Multiply F by the line value G, evaluated at the distorted point φ(Q).

A point addition V ← V + P happens only once, at bit 82:

- λ = (yV + yP) / (xV + xP), which needs one field inversion.
- A second line multiplication follows.

The last iteration (bit 0) is a doubling only; the final addition gives a
vertical line whose value is removed by the final exponentiation. It is
therefore skipped.

**Tower field.** F_2^652 is built in two quadratic steps:

- F_2^326 = F_2^163[u] / (u^2 + u + 1)
- F_2^652 = F_2^326[w] / (w^2 + (u + 1) w + 1)

An element is held as four F_2^163 coordinates, (c0 + c1 u) + (c2 + c3 u) w.

The distortion map is φ(x, y) = (x + s^2, y + s x + t), with s = u + 1 and
t = u w. With it, the line value is sparse:

    G = g0 + g1 u + u w,   g1 = λ + xQ,   g0 = λ (xQ + xV) + xQ + yQ + yV

As a result F · G costs 6 F_2^163 multiplications instead of the 9 a general
F_2^652 product needs.

**Inversion.** 1/a = a^(2^163 - 2) is computed with the Itoh–Tsujii addition
chain 1, 2, 4, 5, 10, 20, 40, 80, 81, 162. That is 9 multiplications and 162
squarings. A squaring is a multiplication of a value by a copy of itself.

**Final exponentiation.** The result is F^((2^652 - 1)/l), computed as:

- F1 = F^(2^326 - 1) = conj(F)^2 / N(F):
  - conj(a + b w) = (a + b (u + 1)) + b w;
  - N(F) ∈ F_2^326 is inverted through its own norm into F_2^163.
- result = F1 · F1^(2^163) · conj(F1^(2^82)), because
  (2^326 + 1)/l = 2^163 + 1 − 2^82:
  - the 2^163-power (Frobenius) costs only additions;
  - F1^(2^82) costs 82 squarings in F_2^652.

**Multiplication count.** The schedule needs 3002 F_2^163 multiplications per
pairing:

| part | multiplications |
|---|---|
| Miller loop: 163 × (4 for F^2, 4 for the doubling, 6 for F·G) | 2282 |
| the one addition step | 181 |
| final exponentiation, incl. two inversions and 82 squarings of F1 | 539 |

## Architecture

```
            din ──┐
                  v
 ┌─────────── register file (15 × 163 bit, neighbour swaps) ───────────┐
 │  R1 ──► A     R2 ──► B     R3  R4  ...  R15   (R15 next to R1: ring) │
 │  ^ shift by D / core result / din         R2 <- R1 (copy)            │
 └──┼──────────────┼────────────────────────────────────────────────────┘
    │  top D bits  │
    │     of A     v
    │      ┌─ F_2^m core: T register + D chained MALUs ─┐
    └──────┤  res = A·B mod R  (ceil(163/D) clocks)     │
           │  res = A + B (+1)  (1 clock)               │
           └────────────────────────────────────────────┘
   controller: program sequencer + variable→register tags → swap_en, dup, r0_sel, go/mul/inc
```

Register numbers in this README count from 1. In the RTL, register 1 is
index 0.

### The F_2^163 core and its MALUs (`malu`, `gf2m_core`)

A MALU is a single row of XOR gates. It takes a partial product t, one bit a
of the multiplier and the multiplicand b, and outputs

    t·z mod R + a·b

Multiplying by z is a one-place shift. Reducing it costs one XOR for each of
the z^7, z^6 and z^3 terms of the reduction polynomial. Adding b costs 163
XORs.

D MALUs are chained, each one's output feeding the next one's t. The core
therefore retires D multiplier bits per clock, most significant bit first, and
a product takes ceil(163/D) clocks:

- The multiplier A is register 1 itself. Register 1 shifts left by D every
  clock, and the core reads its top D bits.
- The multiplicand B is register 2.
- The partial product is the core's only register, T.
  - In the first clock of a multiplication the chain is fed 0 instead of T,
    so T never needs clearing.
- The product is written back into register 1 in the last clock.

When 163 mod D ≠ 0, the last clock must stop early in the chain. The product
then leaves MALU number (163 − 1) mod D, and a multiplexer picks it.

- With D = 1, 2, 3 and 6, 163 mod D = 1, so the product leaves MALU 0. That is
  the same MALU that produces sums, and no multiplexer is needed.
- With D = 4, 8, 16 and 32, the product leaves MALU 2.

An addition A + B goes through MALU 0 with the shift turned off and takes one
clock. Both operations can add the constant 1 (`inc`). The doubling formulas
use this for λ = xV^2 + 1 and y2V = … + 1.

### Register file (`regfile`)

The fifteen registers form a ring: register 15 neighbours register 1.

- Register 1 feeds core input A.
- Register 2 feeds core input B.
- In one clock, any set of non-overlapping neighbour pairs can swap contents.
  Pair i holds registers i and i+1, and pair 15 holds registers 15 and 1.
  A value therefore moves one place per clock in either direction, and two
  values can move at once as long as their swaps don't touch.
- No register is more than seven swaps from register 1.
- Only register 1 has a wide input multiplexer. It can hold, shift by D, take
  the core result or take `din`.
- Register 2 can also take a copy of register 1. This duplicates a value
  without going through the core, which squarings need.

Each register has its own clock gate and is clocked only in clocks where it
is written. The data registers have no reset. An assertion checks that no two
enabled swaps overlap. It also checks that a swap touching register 1 is
never combined with a write into it, and that a swap touching register 2 is
never combined with the copy.

### Controller (`au_controller`, program in `tate_pkg`)

This is the hardest part. The controller does not hard-code a state for every
swap. It runs a short program over fifteen named variables:

- XP, YP, XQ, YQ: the two points;
- XV, YV: the running point V;
- F0..F3: the accumulator F;
- T0..T4: temporaries.

A tag array records which register holds which variable at each moment.

| instruction | effect | clocks after placement |
|---|---|---|
| `COPY a, b` | b ← a (register 2 ← register 1) | 1 |
| `ADD a, b [+1]` | a ← a + b | 1 |
| `MUL a, b [+1]` | a ← a · b (a ≠ b) | ceil(163/D) |
| `REN a, b` | exchange the names a and b; no data moves | 1 |
| `LOAD a` / `STORE a` | a ← din / present a on dout; wait for `next` | ≥ 1 |
| `SETC`, `DJNZ`, `JNEI` | two loop counters: set, decrement-and-branch, compare-and-branch | 1 |
| `CALL`, `RET`, `JMP` | one-level subroutine call, return, jump | 1 |

Before a data instruction runs, the controller looks up where a and b are.

1. While a is not in register 1, it swaps a one place along the shorter way
   round the ring.
   - In the same clock it also moves b one place along b's own shorter way,
     as long as that swap does not touch a's and does not reach register 1.
2. Once a is in place, it moves b to register 2 along the shorter way.
   - Going backward, b must pass through register 1. For one clock b pushes a
     to register 15; then b steps on to register 2 and a steps back.
   - That costs two extra clocks, so b goes backward only when that is still
     shorter: from register 11 or higher (counting from 1).
3. Then it issues the operation.

A multiplication keeps registers 1 and 2 busy for ceil(163/D) clocks, but the
other thirteen registers are idle. In those clocks the controller looks one
instruction ahead:

- It moves the next instruction's a towards register 15, unless that
  variable is an operand of the current instruction, or the next instruction
  uses the current result as b.
- It moves the next b towards register 3, unless it is an operand of the
  current instruction.
- It uses only swaps that keep clear of registers 1 and 2.

When the next instruction starts, each operand is then one swap from its
place, and both swaps happen in the same clock.

In every clock of placement, either a gets closer to register 1 or, with a in
place, b gets closer to register 2. The one exception is the step where b
passes through register 1, and its cost is already counted. Placement
therefore always ends. Each swap also exchanges the two tags. Values used
recently therefore collect near the core. Values left untouched drift away
from it.

`REN` makes some moves free. For example, after computing a new coordinate
into a temporary, the program can rename the temporary as the coordinate
rather than copy the data.

The program is built when the design is elaborated, by the constant function
`tate_pkg::build_program()`. It has:

- three subroutines:
  - squaring of F in F_2^652;
  - multiplication of F by the sparse line value G;
  - the F_2^163 inversion (argument T0, result T1);
- the main body: load, Miller loop, final exponentiation, four stores.

Extension-field products use Karatsuba: 3 F_2^163 products per F_2^326
product. Changing the algorithm means editing this function. The hardware
does not depend on the program, apart from the width of the program counter
(`pc_t`) and the `PROG_MAX` bound.

In hardware the program is a constant table of 512 31-bit words. The table is
read at two addresses: the current instruction and, for the look-ahead, the
next one. A synthesis tool may therefore build it twice. The same program
could also be stored as a single ROM with a second read port, or the
look-ahead could be dropped; without it each pairing takes about 4,000 more
clocks.

### Clock gating and input timing (`clock_gate`)

Each gate has two parts:

- a latch, transparent while `clk` is high, that captures the enable;
- the gated clock `gclk = clk | ~en_latched`.

An idle register's clock stays high and its clock net does not toggle.

The latch closes when `clk` falls. So every enable, and with it every input
of the unit, must be settled before the falling edge. In practice, change
inputs shortly after the rising edge. The testbenches drive at
`@(posedge clk) #1`. An input changed on the falling edge is missed for one
clock.

## Interface (`tate_au`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous active-low reset of the controller (data registers are not reset) |
| `din` | in | 163 | input coordinate |
| `next` | in | 1 | "coordinate on din" while loading; "advance" while unloading |
| `in_ready` | out | 1 | unit waits for an input coordinate |
| `dout` | out | 163 | result coordinate (register 1) |
| `out_valid` | out | 1 | `dout` holds a result coordinate |

Protocol:

1. After reset the unit raises `in_ready`.
2. Give xP, yP, xQ and yQ, one per clock in which `in_ready` is high, with
   `next` high in that clock.
3. About 531,000 clocks later (D = 1), `out_valid` rises with c0 on `dout`.
4. Each clock with `next` high moves on to c1, c2 and then c3.
   - The result is (c0 + c1 u) + (c2 + c3 u) w.
5. After c3 the unit waits for the next pair of points.

The only parameter is `D`, the number of MALUs (default 1). Field size,
polynomial and curve are fixed in `tate_pkg`.

## Performance

Measured clocks for one pairing:

- **Built:** measured by `tb_tate_au_malus`, from reset to the last result
  coordinate. The D = 1 row is 41,660 + 3002 · 163. The full-size test,
  which counts from the first input to the first output, measures 530,976.
  - The clocks outside multiplications are 41,660 for D ≤ 8.
  - They grow slightly for D = 16 and 32 (41,698 and 42,321), because short
    multiplications hide fewer of the look-ahead swaps.
- **Reference figure:** the original design's cycle formula,
  21,681 + 4,322 + 2,998 · ceil(163/d).

| D | built | reference figure |
|---|---|---|
| 1 | 530,986 | 514,677 |
| 2 | 287,824 | 271,839 |
| 3 | 206,770 | 190,893 |
| 4 | 164,742 | 148,921 |
| 6 | 125,716 | 109,947 |
| 8 | 104,702 | 88,961 |
| 16 | 74,720 | 58,981 |
| 32 | 60,333 | 43,991 |

The multiplication time matches the original to within 4 products. The gap is
in the operand moves:

- this schedule, per pairing:
  - about 32,200 swap clocks, plus about 3,400 hidden under
    multiplications;
  - 4,522 additions;
  - 2,680 copies;
  - about 2,300 clocks of control, renames and input/output;
- the original: 21,681 swap clocks and 4,322 additions.

The original's register allocation and state machine are not published.
This design's run-time placement is a generic substitute. A better variable
order in `build_program()` is the place to start recovering those clocks.

Examples of the cost:

- At 10 kHz a pairing takes 53.1 s with D = 1.
- Finishing a pairing in 50 ms needs:
  - 10.6 MHz with D = 1;
  - 5.8 MHz with D = 2.

## Where this design departs from the original

- **Controller:** the original is a hand-built 553-state FSM. Here it is a
  program sequencer with run-time operand placement (see above). Cycle counts
  differ accordingly.
- **Multiplications:** 3002 F_2^163 multiplications per pairing, four more
  than the original's 2998. This comes from this design's own schedule.
- **Extra features of this design:**
  - the register 2 ← register 1 copy path;
  - the look-ahead operand moves during multiplications;
  - the `inc` (+1) input of the core;
  - the `in_ready` / `out_valid` status outputs;
  - the coordinate order in and out.
- **Any D allowed.** The original prefers D with 163 mod D = 1, so that both
  results leave the first MALU. This design also supports any other D, at the
  cost of one multiplexer.
- **Not covered:**
  - area and power;
  - the standard-cell library;
  - the synthesis settings behind the original's gate counts.

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=… failures=…`
line. The reference model, `tb/tate_ref_pkg.sv`, is written independently of
the RTL:

- it uses schoolbook tower-field products and a general distortion map;
- it computes the final exponentiation as a plain power F^((2^652 − 1)/l),
  with the exponent found by long division.

| testbench | what it checks |
|---|---|
| `tb_malu` | one MALU step in both modes against the reference field arithmetic; random operands and operands with the top bit set |
| `tb_gf2m_core` | products and sums for D = 1…4 against the reference; ceil(163/D) clocks per product |
| `tb_clock_gate` | rising gated edges exactly after enabled cycles; clock high through disabled cycles; no change while `clk` is high |
| `tb_regfile` | D = 2 register file against a model under random swap/shift/write patterns, the ring-closing swap included |
| `tb_au_controller` | the full program on a behavioural datapath; checks the pairing, the swap rules (ring neighbours only, never overlapping) and 3002 multiplications |
| `tb_tate_au` | full-size unit (D = 1), described below |
| `tb_tate_au_malus` | D = 2, 3, 4, 6, 8, 16, 32 side by side against the reference; checks multiplication length and 3002 multiplications; checks that the clocks outside multiplications grow with D by at most 3 % |

`tb_tate_au` checks:

- e(P, Q) and e(2P, Q) against the reference;
- bilinearity, e(2P, Q) = e(P, Q)^2;
- that the result r satisfies r^l = 1 and r ≠ 1;
- 3002 multiplications of 163 clocks each;
- each pairing within 5 % of the 514,677-clock budget of the one-MALU
  architecture (at most 540,410 clocks).

It also counts each mechanism: swaps, copies, additions, the addition step
(twice, once per pairing), inversions (four), and input and output waits.

Simulate with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/tate_pkg.sv tb/tate_ref_pkg.sv -y rtl +libext+.sv \
  tb/tb_tate_au.sv --top-module tb_tate_au
./obj_dir/Vtb_tate_au
```

- For another testbench, replace the last file and the top module name.
- The packages must come first.
- `-y rtl` lets Verilator find the modules.
- `tb_tate_au` runs two full pairings in a few seconds.
- `tb_tate_au_malus` runs seven pairings in about 20 seconds.
