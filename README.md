# Iterative BCD multiplier with overloaded decimal intermediate products

This is a synthesizable SystemVerilog model of an iterative decimal multiplier.
It multiplies two N-digit BCD numbers (N = 34 by default, the coefficient size of
IEEE 754 decimal128) into a 2N-digit BCD product. It retires one multiplier
digit per clock cycle. The loop that does this is short because it never
corrects its digits to BCD inside the loop.

The main idea is the **overloaded decimal representation** of the intermediate
product. Each digit position still has weight ten, but its four bits may hold
any value from 0 to 15. The accumulating adder is therefore plain 4-bit binary
per digit. When a digit's binary addition carries out (a value of sixteen),
the carry goes to the next digit as a one. The six that is then missing is
remembered and added in the *next* iteration, through the choice between a
multiple digit and that digit plus six. Digits are brought back to BCD only
after they leave the loop.

Latency is N+8 cycles, and a new multiplication can start every N+1 cycles.
Both figures are those of the published design and are checked by the
testbenches.

## Interface and timing

`dec_mult #(N)` ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | operands valid; accepted when `ready` is high |
| `a_in`, `b_in` | in | N BCD digits (`digit_t [N-1:0]`) | multiplicand, multiplier |
| `ready` | out | 1 | `start` is accepted in this cycle |
| `done` | out | 1 | one-cycle pulse: `p` holds the product |
| `p` | out | 2N BCD digits | product, held until the next one |

Call the cycle in which `start && ready` holds cycle 0. Then:

* cycle 1: the secondary multiples settle from the new multiplicand;
* cycles 2 … N+1: iterations 0 … N-1, one multiplier digit each,
  least significant first;
* cycles N+2 … N+5: the adder drains, and the intermediate product clean-up runs;
* cycles N+6, N+7: the decimal carry-propagate adder runs;
* cycle N+8: `done` is high and `p` is valid.

Operand digits must be BCD (0-9). A multiplier digit of A-F is treated as
zero, and a multiplicand digit of A-F gives a meaningless product.

`ready` is high when the multiplier is idle. It is also high in the cycle of the
last iteration (cycle N+1), so operands may be streamed every N+1 cycles. The
next multiplication's iterations start while the previous one drains.

## Data path

```
 a_in ─► operand_regs ─ A ─► sm_gen ─ 2A,4A,5A ─┐
 b_in ─►      │ b_t (one digit per cycle)       ▼
              └──────────────────────────► sm_select ─ SM1, SM2 (SM1+SM2 = A*b_t)
                                                 ▼
                    ┌──── od_adder: stage 1 (CSA) ─ latch ─ stage 2 (4-bit CPA) ─► PR ──┐
                    └─────────────── pr_{i+2} (PR read two digits down) ◄───────────────┘
                                                 │
                 pr_1, pr_0 of PR every cycle    │    all of PR after the last iteration
                               ▼                 ▼
                        cleanup_digit       ip_cleanup ─ BCD digits + 1-bit carries
                    (one BCD digit/cycle) ─cy─►  │
                               ▼                 ▼
                            fp_sreg           dec_cpa (2 stages)
                          low N digits      high N digits ──► p
```

* **`sm_gen`** forms 2A, 4A and 5A without a carry ripple. A digit of 2A is
  (2a_i mod 10) plus one if a_{i-1} ≥ 5. A digit of 5A is 5·(a_i odd) plus
  ⌊a_{i-1}/2⌋. 4A is 2A applied twice. The multiplicand stays fixed during a
  multiplication, so the multiples are not registered.
* **`sm_select`** splits the digit b into SM1 ∈ {0, A, 4A, 5A} and
  SM2 ∈ {0, A, 2A, 4A}: 0=0+0, 1=A+0, 2=A+A, 3=A+2A, 4=4A+0, 5=5A+0, 6=4A+2A,
  7=5A+2A, 8=4A+4A, 9=5A+4A.
* **`od_adder`** is the iterative heart (next section).
* **`cleanup_digit`** turns the two digits that leave the loop each cycle into
  one BCD product digit per cycle. **`fp_sreg`** collects these digits.
* **`ip_cleanup`** and **`dec_cpa`** finish the high half once the
  iterations are over.
* **`dm_ctrl`** sequences all of this. **`dm_pkg`** holds the `digit_t` type
  and small helper functions.

## The overloaded decimal adder and its carry flags

The intermediate product register PR has W = N+1 digit positions. The value
stays below 9.1·10^N, so N+1 positions are enough. Each position j holds a
4-bit digit p_j and two flags:

* `ft[j]` ("co top"): the stage-1 carry-save adder of digit j carried out. The
  one was passed to digit j+1 in the same cycle, as bit 0 of that digit's
  carry word. Six is still owed to digit j.
* `fb[j]` ("co bot"): the stage-2 4-bit adder of digit j carried out. Six is
  owed to digit j, and one is owed to digit j+1.

The value PR stands for is therefore

    V = Σ_j 10^j · (p_j + 6·ft_j + 6·fb_j)  +  Σ_j 10^(j+1) · fb_j .

An iteration computes, per digit i:

    stage 1:  x = ft_{i+2} ? sm1_i + 6 : sm1_i     (BCD + 6 ≤ 15, fits 4 bits)
              y = fb_{i+2} ? sm2_i + 6 : sm2_i
              (s, c) = carry-save sum of x, y, p_{i+2};  ft'_i = c[3]
    stage 2:  {fb'_i, p'_i} = s + {c[2:0], ft'_{i-1}} + fb_{i+1}

No carry crosses a digit boundary inside stage 2. The owed sixes of digit
i+2 are paid when that digit has become digit i. The owed one of `fb` enters
as the carry-in of the stage-2 adder one position up. The top position never
carries out, and assertions check this.

### Why the PR read is shifted by two

The loop is two registers long: the stage-1 latch and PR. So iteration t
reads the result of iteration t-2, not t-1. Two independent intermediate
products are in flight at any time: one collects the even multiplier digits,
the other the odd ones. Between two visits, an intermediate product must move
down by two digit positions, so stage 1 reads p_{i+2}. For the first two
iterations of a multiplication the read is forced to zero (`clr`).

## Cleaning up the digits that leave the loop

Each cycle, the intermediate product in PR drops its two lowest positions,
pr_1 and pr_0. Product weight w receives two of these digits: pr_1 of one
intermediate product in some cycle, and pr_0 of the other one in the next
cycle. `cleanup_digit` follows exactly that rhythm:

1. stage 1: u = pr_1 + 6·ft_1 + 6·fb_1 + fb_0 (0…28);
2. stage 2: carry-save sum of u, the next cycle's pr_0, and 6·ft_0 + 6·fb_0;
3. stage 3: binary add, giving d (0…55);
4. stage 4: d = 10h + l; s = l + carry from the previous digit (0…15).
   If s ≥ 10, add six (mod 16) and carry one.
   The carry to the next digit is h plus that one (0…6).

In total N low product digits come out this way, one per cycle, into `fp_sreg`.

When the iterations end, PR holds R_{N-2} (in cycle N+2) and then R_{N-1}
(in cycle N+3). `ip_cleanup` takes positions 2… of the first and positions 1…
of the second. These are the digits of weights N … 2N-1. It merges them with
the same four stages. Its stage 4 adds the tens of the position below; for
the lowest position this is the last carry out of `cleanup_digit`, in the
same cycle. What remains is one BCD digit and a one-bit carry per position.
`dec_cpa` adds these in two stages. Each position sum is then 0…10, so a
position can only generate a carry (10) or propagate one (9).

## What follows the published design and what is this design's own

Taken from the published design:

* the overloaded digit representation;
* the two-stage adder with the PR read at i+2, the carry-out flags choosing
  between sm and sm+6, and the half-way latch;
* the secondary multiple sets;
* the serial 4-stage clean-up of pr_1/pr_0;
* the intermediate product clean-up feeding a two-stage simplified decimal
  carry-propagate adder;
* the N+8 latency and the N+1 issue interval.

Chosen here, because the published description leaves it open:

* **Carry routing.** Which carry goes where: co_top to bit 0 of the next
  digit's carry word, co_bot as a stored flag that supplies both a six and
  the next iteration's carry-in.
* **PR width.** PR has N+1 positions.
* **Clean-up corrections.** With two flags per digit, the clean-up adds
  corrections of 0/6/12 in both of its first two stages. The published block
  adds one +0/6 in stage 1 and two in stage 2.
* **Clean-up carries.** The serial clean-up passes a decimal carry of up to 6
  between digits, by a tens/units split in stage 4.
* **Decimal carry-propagate adder.** Its insides come from the referenced
  earlier design and are not published with this one. Here it uses a simple
  generate/propagate chain.
* **Control and handshake.** The `start`/`ready`/`done` handshake, reset
  behaviour and the exact cycle plan that gives N+8.
* **Multiplier digit split.** The split of b = 2 is A+A.

The design has been checked in RTL simulation only. No timing closure
was attempted. The published figures (about 2 GHz in a 0.11 µm library, with
eight logic levels in adder stage 1) are not something this model reproduces
or claims.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each compares
against values computed independently in the testbench, and ends with a
`TB_RESULT checks=… failures=…` line.

* `tb_dec_mult` runs at the default N = 34. It issues 300 multiplications,
  mostly back to back with some idle gaps. Corner cases include all nines,
  zero, one and large-digit operands. Every product is compared with a
  schoolbook decimal multiplication, and the latency must be exactly N+8.
  A start while busy must come exactly N+1 cycles after the previous one.
  The test also counts overloaded digits in PR, both kinds of carry flag,
  clean-up carries above one, back-to-back starts and starts from idle. It
  fails if any of them never occurs.
* `tb_dec_mult_sizes` runs the 8- and 16-digit configurations side by side.
* `tb_od_adder` checks, after every iteration, that the value PR stands for
  equals the value two iterations earlier, less its two dropped digits,
  plus A·b_t.
* `tb_cleanup_digit`, `tb_ip_cleanup` and `tb_dec_cpa` check the exact
  decimal value of what they emit.
* `tb_dm_ctrl` compares every control output in every cycle with a model
  derived from the accepted start cycles.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dm_pkg.sv tb/tb_dec_mult.sv \
          --top-module tb_dec_mult -o sim
./obj_dir/sim
```

Replace `tb_dec_mult` with any other testbench name. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/dm_pkg.sv rtl/dec_mult.sv`.

To change the size, override `N` on `dec_mult`; N must be at least 2. The
only Verilator warning left is `SYNCASYNCNET`: the reset is used
asynchronously by the flip-flops and as `disable iff` in the assertions.
