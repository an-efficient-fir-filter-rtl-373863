# Nine-tap FIR filter built on a single-pass three-operand adder

A direct-form FIR filter spends most of its adder area summing products. With an
adder that takes three operands at once, nine products need four additions (three
sums of three, then one sum of the three results) instead of eight two-operand
additions. That only pays off if a three-operand adder is not much slower or larger
than a two-operand one. The usual choices both have a drawback:

* a carry-save row followed by a ripple-carry adder is small but has a carry chain
  as long as the word;
* a carry-save row followed by a parallel-prefix two-operand adder is fast but
  spends a full prefix network on it.

The adder here folds the carry-save row into the front of a parallel-prefix adder
and uses a sparse (Han-Carlson-style) prefix network, so the carry delay grows with
log2(N) while the cell count stays well below a dense prefix tree. The filter then
uses four of these adders.

Everything is combinational except the eight sample registers of the filter.

## The three-operand adder (`three_operand_adder`)

`{cout, s} = a + b + c + cin` for N-bit unsigned `a`, `b`, `c` and a 1-bit `cin`.
The result has N + 2 bits: `s` holds bits 0..N and `cout` bit N+1. The default is
N = 16.

It works in four stages, each its own module:

| stage | module | per position i | cells |
|---|---|---|---|
| 1. bit addition | `bit_addition_logic` (`full_adder_cell`) | `S'_i = a_i ^ b_i ^ c_i`, `cy_i = maj(a_i, b_i, c_i)` | N full adders |
| 2. base | `base_logic` (`saltire_cell`) | `G_i = S'_i & cy_{i-1}`, `P_i = S'_i ^ cy_{i-1}`, with `cin` in place of `cy_{-1}` | N half adders |
| 3. PG (prefix) | `pg_logic` (`black_cell`, `grey_cell`) | `G_{i:0}` for every position | see below |
| 4. sum | `sum_logic` | `S_0 = P_0`, `S_i = P_i ^ G_{i-1:0}`, `cout = G_{N:0}` | N XORs |

Stage 1 is a plain carry-save row: `a + b + c = S' + 2*cy`. Stage 2 is the first
step of adding those two vectors. `S'_i` and `cy_{i-1}` have the same weight, and
the half adder on them gives the bit generate and propagate of position i. The carry
vector reaches one position further left than `S'`, so there are N + 1 positions,
0..N. At position N there is no `S'_N`, so `G_N = 0` and `P_N = cy_{N-1}`, and that
position needs no cell. The external carry-in enters at position 0 as the second
input of the first half adder. Stages 3 and 4 are an ordinary prefix adder on the
N + 1 (G, P) pairs.

### The prefix network (`pg_logic`)

This is the part that takes the most care. Its parameter is `W`, the number of
positions (N + 1 inside the adder). It produces `gc[i] = G_{i:0}`, the carry out of
position i. Two cell types merge a high group `i:k` with the adjacent low group
`k-1:j`:

* `black_cell`: `G_{i:j} = G_{i:k} | P_{i:k} & G_{k-1:j}` and `P_{i:j} = P_{i:k} & P_{k-1:j}`.
* `grey_cell`: the generate only. It is used when the low group already reaches
  bit 0, because after that nothing needs the group propagate.

The network is built in three parts:

1. **Odd positions, Kogge-Stone among themselves.** There are `K = clog2(W)` rows.
   In row r, odd position i merges with position `i - 2^(r-1)`. Row 1 therefore
   pairs each odd position with the even position just to its right. Later rows pair
   odd positions with each other. After row r the node at i covers bits
   `i .. max(0, i - 2^r + 1)`.
2. **Grey where the low side reaches bit 0.** A merge in row r uses a grey cell when
   its partner `j = i - 2^(r-1)` is below `2^(r-1)`, meaning the partner's group
   already ends at bit 0. Otherwise it uses a black cell. A node that has reached
   bit 0 is passed down unchanged.
3. **One extra row for even positions.** Each even position i ≥ 2 takes one grey
   cell: `G_{i:0} = G_i | P_i & G_{i-1:0}`, fed by the finished odd position to its
   right. Position 0 is `G_0` itself.

For W = 17 (the 16-bit adder) this gives these rows:

```
row 1: 1:0(g)  3:2  5:4  7:6  9:8  11:10 13:12 15:14
row 2: 3:0(g)  5:2  7:4  9:6  11:8 13:10 15:12
row 3: 5:0(g)  7:0(g) 9:2 11:4 13:6 15:8
row 4: 9:0(g)  11:0(g) 13:0(g) 15:0(g)
last:  2:0 4:0 6:0 ... 14:0 16:0      (all grey)
```

The depth is at most `clog2(W) + 1` cell delays (5 for W = 17, where the fifth odd-position row is empty). Add one full adder, one half adder and one
XOR for the whole adder. Every loop bound and cell choice is computed from `W` at
elaboration time, so any N ≥ 2 works. The testbench checks N = 2, 3, 16, 32, 64 and
128.

Nodes that become grey do not compute a group propagate. Their propagate slot in the
internal row arrays is tied to 0 and never read. In the `base_logic` and `pg_logic`
size reports this shows up as a few constant or pass-through outputs (`G_N = 0`,
`P_N = cy_{N-1}`, `gc[0] = G_0`, `S_0 = P_0`). They are correct and expected.

## The filter (`fir_filter`, top)

```
yn = b[0]*x[n] + b[1]*x[n-1] + ... + b[8]*x[n-8]
```

* **Delay line.** Eight `unit_delay` registers, X1..X8, hold x[n-1]..x[n-8]. Each is
  an 8-bit register loaded on every rising edge. Together they form an 8-bit-wide
  shift register.
* **Taps.** Nine `multiplier` instances give 16-bit unsigned products of the 8-bit
  sample and the 8-bit coefficient.
* **Adder tree.** Three 16-bit `three_operand_adder` instances sum products
  (0,1,2), (3,4,5) and (6,7,8) into 18-bit partial sums. One 18-bit instance sums
  those three into the 20-bit `yn`. All carry-ins are 0. Twenty bits hold the worst
  case, 9 × 255 × 255 = 585 225, so the output cannot overflow.

Shared sizes and types (`TAPS`, `DATA_W`, `COEF_W`, `sample_t`, `coef_t`, `acc_t`,
...) are in the package `fir_pkg`.

### Ports and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | sample clock: one sample per rising edge |
| `rst` | in | 1 | synchronous, active high; clears X1..X8 |
| `xn` | in | 8 | current sample x[n] |
| `b` | in | 9 × 8 | coefficients b0..b8, unsigned |
| `yn` | out | 20 | y[n], unsigned |

`yn` has no output register. It settles combinationally from `xn`, `b` and X1..X8,
so it shows y[n] for the sample held on `xn` during the same cycle. The next rising
edge moves that sample into X1. With a constant input after reset, the output
reaches its final value after 8 edges. For example, with b = 1..9 and x = 10 held,
the output steps through 10, 30, 60, 100, 150, 210, 280, 360 and settles at 450.

## What is given and what is chosen

Taken from the source design:
* the four adder stages and their equations;
* the cell types;
* the pattern of the prefix network, from its 16-bit drawing;
* the carry-in at position 0;
* nine taps, 8-bit samples and a 16-bit adder example;
* the step response above.

Chosen here, because the source leaves it open:
* **Adder top position.** Position N is handled as a wire pair (`G_N = 0`,
  `P_N = cy_{N-1}`) rather than a cell. One count of the base cells in the source
  disagrees with its drawing and its area estimate. The drawing and the estimate were
  followed.
* **Arithmetic format.** Unsigned arithmetic, 8-bit coefficients and a full-width
  product.
* **Coefficient ports.** Coefficients are input ports rather than constants.
* **Adder tree.** The 3-3-3 grouping of the tree.
* **Reset.** Synchronous active-high reset that clears the delay line.
* **Output timing.** A combinational output with no pipeline registers.
* **Multiplier.** A plain `*` operator. The source only asks for a fast, precise
  multiplier, and synthesis chooses its structure.

Not included:
* **Comparison adders.** The carry-save/ripple adder and the dense Han-Carlson
  three-operand adders that the design is measured against.
* **Synthesis results.** The area, delay and power figures come from a 32 nm
  standard-cell synthesis, which this RTL does not reproduce.

## Verification

Each module has a self-checking testbench in `tb/` named `tb_<module>`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog.

* **Cells** (`full_adder_cell`, `saltire_cell`, `black_cell`, `grey_cell`): all
  input combinations, checked against arithmetic or carry-behaviour references.
* **Adder stages**: random and corner vectors, checked against arithmetic
  identities. For example, `S' + 2*cy = a + b + c`, and `Σ(2G_i + P_i)2^i` must equal
  `S' + 2*cy + cin`. The prefix network is checked against a ripple-carry model at
  five widths.
* **`three_operand_adder`**: widths 2, 3, 16, 32, 64 and 128, with random and
  all-ones operands, and the 16-bit example 1 + 2 + 4 = 7.
* **`multiplier`**: all 65 536 operand pairs, against shift-and-add.
* **`tb_fir_filter`**: end to end, at the default sizes.
  * Phases: the step response above, including the 8-edge settling, an impulse
    response, the input ramp 0..8 after a reset, full-scale input, and 3000 random
    cycles with random resets.
  * Every cycle is compared with an integer reference model.
  * The testbench counts reset events that cleared history, cycles with a full delay
    line, and carry-outs of the first-level and final adders. It fails if any of
    these never happened.

Every testbench ends in well under a second of simulation.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/fir_pkg.sv tb/tb_fir_filter.sv --top-module tb_fir_filter -Mdir obj_fir
./obj_fir/Vtb_fir_filter
```

Replace `tb_fir_filter` with any other testbench name to run it. Linting:
`verilator --lint-only -Wall -Irtl -y rtl rtl/fir_pkg.sv rtl/fir_filter.sv`.

## Changing it

* **Adder width**: set `N` on `three_operand_adder`. The prefix network follows
  automatically.
* **Filter sizes**: change the sizes in `fir_pkg`. `L1_W` and `OUT_W` are derived
  from them.
* **Tap count**: the adder tree in `fir_filter` is written for exactly nine taps (two
  levels of three-operand adders). Another tap count needs a different tree.
