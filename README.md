# Fuzzy-logic wash-time controller

A small fixed-function chip that decides how long a washing machine should
wash. It reads three sensor values, each an 8-bit number from 0 to 100:

* **dirtiness** of the clothes (Large / Medium / Small),
* **type of dirt** (Greasy / Medium / Not Greasy),
* **mass** of the load (Heavy / Medium / Light),

and returns a **wash time** from 0 to 12, in units of 12 minutes
(8 means 96 minutes). In between sits a textbook Mamdani fuzzy controller:
table-driven fuzzification, 27 IF-THEN rules evaluated with MIN-MAX
inference, and centre-of-gravity defuzzification.

Two ideas keep the hardware small:

1. **Integer grades.** Membership grades run from 0 to 10 instead of 0.0 to
   1.0. Every operation is an integer compare, add, multiply or divide, and
   4 bits carry a grade through the defuzzifier.
2. **The output axis is swept in time, not laid out in space.** The output
   fuzzy set is not stored as 13 grades. A MOD-13 counter steps through the
   13 wash-time points, one per clock. At each point the rule hardware works
   out the single grade `m_i`, and two accumulators add `i*m_i` and `m_i`
   into running sums. After a full sweep one array divider gives the crisp
   result. One copy of the rule hardware therefore serves all 13 points.

The RTL is a reconstruction of a design that was drawn at transistor level
for 0.5 µm CMOS. It keeps that design's block structure: mask ROMs behind
word-line decoders, two-input MIN/MAX cells built from a comparator and a
bit selector, a 5-level MAX tree, a 4x4 array multiplier, two-edge
accumulator registers and a controlled add/subtract (CAS) array divider.
Where the original leaves something open, this RTL fills the gap with its
own choice. Those choices are listed in
[Departures and own choices](#departures-and-own-choices).

## Data flow

```
 dirt ──► 3 fuzzifiers ─┐ (grade of Large/Med/Small)
 grease ─► 3 fuzzifiers ─┤                 ┌────────────────────┐
 mass ──► 3 fuzzifiers ─┼──── li[3][3] ───►│  inference_engine  │
                        │                  │ 27 x min4          │── m (8b, 0..10)
 mod13_counter ─count─► 5 fuzzifiers ─lo[5]►│ max_tree27         │      │ m[3:0]
        │                                  └────────────────────┘      ▼
        └────────────────────── count ─────────────────────────► defuzzifier
                                                                 dividend_unit (Σ i·m_i)
                                                                 divisor_unit  (Σ m_i)
                                                                 cas_divider   ──► wash_time
```

All logic between the input registers and the accumulator registers is
combinational. The whole design has 99 flip-flops.

## Fuzzification: word-line decoders and mask ROMs

Each adjective has its own fuzzifier: 9 for the inputs and 5 for the output,
14 in all. A fuzzifier is a `wordline_select` decoder driving a
`membership_rom`:

* `wordline_select` captures the 8-bit input in flip-flops on the **falling**
  clock edge. It then compares the held value with the constants
  0, 10, 20, …, 100, using one AND gate per ROM word. Word line *k* goes high
  only when the input is **exactly** `10*k`.
* `membership_rom` ORs together the words whose word line is high. This
  models a precharged NOR ROM: with no word line high, it reads 0.

The decode is exact, so **only multiples of 10 are meaningful inputs.** Any
other value, such as 45 or 101, selects no word. Every grade of that input is
then 0, no rule fires, and the wash time is 0. The sensor front end must
quantise its readings to the 10-step grid.

The three inputs share the same three membership tables:

| crisp input           | 0  | 10 | 20 | 30 | 40 | 50 | 60 | 70 | 80 | 90 | 100 |
|-----------------------|----|----|----|----|----|----|----|----|----|----|-----|
| Small / Not Greasy / Light | 10 | 8 | 6 | 4 | 2 | 0 | 0 | 0 | 0 | 0 | 0 |
| Medium                | 0  | 2  | 4  | 6  | 8  | 10 | 8  | 6  | 4  | 2  | 0   |
| Large / Greasy / Heavy | 0 | 0 | 0 | 0 | 0 | 0 | 2 | 4 | 6 | 8 | 10 |

The Small row is the original design's table. The Medium and Large rows are
this design's choice: a centred triangle and the mirror image of Small.

The five wash-time ROMs are addressed by the counter value `i` = 0..12. They
are triangles with peaks at 0, 3, 6, 9 and 12 (Very Low, Low, Medium, High,
Very High). The grade is 10 at the peak, 7 one step away, 3 two steps away
and 0 further out. These shapes are also this design's choice. All tables are
computed at elaboration time by `fuzzy_pkg::rom_word`, so changing a
membership function means editing that one function.

## Inference: 27 rules, MIN-MAX

The rule base (`fuzzy_pkg::RULES`) covers all 27 combinations of the input
adjectives. Output adjectives: VL = Very Low, L = Low, M = Medium,
H = High, VH = Very High.

| dirtiness \ (type, mass) | G,H | G,M | G,L | M,H | M,M | M,L | N,H | N,M | N,L |
|--------------------------|-----|-----|-----|-----|-----|-----|-----|-----|-----|
| Large                    | VH  | H   | M   | H   | M   | L   | H   | L   | M   |
| Medium                   | H   | M   | L   | M   | M   | L   | M   | L   | L   |
| Small                    | H   | M   | L   | M   | L   | L   | M   | L   | VL  |

(G = Greasy, M = Medium, N = Not Greasy; H = Heavy, M = Medium, L = Light.)

For every rule a `min4` takes the minimum of four grades: the three premise
grades, and the grade of the rule's conclusion at the current output point
`i`. This is MIN clipping of the conclusion set, done one point at a time.
`max_tree27` then ORs (MAX) the 27 clipped values. It is a fixed tree of 28
two-input MAX cells: 27 inputs plus a zero, then 14, 7 plus a zero, 4, 2, 1.
Its output `m` is the grade of the aggregated output set at point `i`.

Each two-input cell (`minmax_unit`) is a `minmax_selector` followed by a
`bit_selector`. The selector's one-hot pair Select A / Select B marks the
smaller operand. A MAX cell is the same circuit with the two selects swapped.
The bit selector is an AND-OR multiplexer.

## The sweep and its timing

This is the part that needs the most care when integrating the block. The
design uses **both clock edges**:

| edge    | what happens |
|---------|--------------|
| falling | counter advances; input registers capture the sensors; Register 1 ← product `m*count` (dividend) or `m` (divisor); Register 2 ← Register 3, or 0 at the end of count 11 |
| rising  | Register 3 ← Register 1 + Register 2 (ripple adder); Register 4 ← Register 3 while count = 12; `wash_time_valid` ← (count = 12) and not the first sweep |

Let `p(c)` be the product formed while the counter shows `c`. At the falling
edge that ends `c`, Register 1 takes `p(c)`. Half a clock later Register 3
holds the running sum including `p(c)`. Register 2 is zeroed at the edge that
ends count 11, so each sweep covers the counts 11, 12, 0, 1, …, 10. By the
rising edge during count 12, Register 3 holds the complete 13-term sum from
the previous rising edge, and Register 4 takes it. The divider is
combinational on the two Register 4 outputs, so `wash_time` changes at that
rising edge and holds for the next 13 clocks.

Consequences for a user:

* **Throughput:** one result every 13 clocks. `wash_time_valid` is a
  one-clock strobe, registered on the rising edge.
* **Latency:** the inputs must be stable for one whole sweep. After an input
  change, the first strobe may still contain terms from the old inputs. The
  **second** strobe after the change is the first clean result (at most
  26 clocks, plus up to one clock for the input register).
* **After reset** the first sweep starts at count 0 rather than 11, so it is
  incomplete. Its strobe is suppressed. The first strobe comes 25 clocks
  after reset is released.
* The output ROMs decode the counter directly, with no register of their own.
  The grade `lo[k]` therefore belongs to the same count that the multiplier
  sees. Adding a register there would shift the output set by one point.
  The top-level test contains that exact fault.

## Defuzzification arithmetic

`wash_time = floor( Σ_{i=0..12} i·m_i / Σ_{i=0..12} m_i )`

| quantity      | bound               | register width |
|---------------|---------------------|----------------|
| `m_i`         | 10                  | 4 bits (low 4 of the 8-bit grade) |
| `i·m_i`       | 120                 | 8-bit product of the 4x4 `array_multiplier` |
| dividend      | 10·(0+…+12) = 780   | 11 bits |
| divisor       | 13·10 = 130         | 8 bits |
| quotient      | ≤ 12                | 4 bits |

`cas_divider` is a non-restoring array. It has 4 rows of 12-bit CAS cells,
each cell an XOR on the divisor bit plus a full adder. Row *k* adds or
subtracts `divisor << k`, depending on the sign of the previous partial
remainder. Only 4 quotient bits are computed, which is exact whenever
`dividend < 16·divisor`. A weighted average of 0..12 always meets that bound.
The remainder is discarded, so results are truncated. The classic
all-grades-10 example gives 780/120 = 6.5, which becomes 6. A zero divisor
(no rule fired) yields 0.

Worked examples (inputs dirt, grease, mass):

| inputs        | m_0 … m_12                               | Σ i·m | Σ m | wash_time |
|---------------|-------------------------------------------|-------|-----|-----------|
| 40, 70, 60    | 0 2 2 2 3 6 6 6 3 2 2 2 0                 | 216   | 36  | 6 (72 min) |
| 100, 100, 100 | 0 0 0 0 0 0 0 0 0 0 3 7 10                | 227   | 20  | 11 (132 min) |
| 0, 0, 0       | 10 7 3 0 0 0 0 0 0 0 0 0 0                | 13    | 20  | 0 |

The centre of gravity never reaches the ends of the axis. Over the full
input grid the results span 0..11, and 12 is never produced.

## Interface of the top, `fuzzy_wash_controller`

| port              | dir | width | meaning |
|-------------------|-----|-------|---------|
| `clk`             | in  | 1     | clock; both edges used |
| `rst_n`           | in  | 1     | asynchronous active-low reset of all registers |
| `dirt`, `grease`, `mass` | in | 8 each | crisp sensor values, multiples of 10 in 0..100 |
| `wash_time`       | out | 4     | 0..12, in 12-minute units; held between strobes |
| `wash_time_valid` | out | 1     | one-clock strobe when a new result is latched |
| `count`           | out | 4     | the sweep counter, for observation |

Parameter `DATA_W` (default 8) is the sensor width. The tables assume 8
bits, so leave it at 8.

## Module map

| module | role |
|--------|------|
| `fuzzy_pkg` | grade type, adjective enum, rule table, ROM contents function |
| `full_adder`, `ripple_adder` | one-bit cell (two XOR, two AND, one OR) and N-bit ripple adder |
| `array_multiplier` | 4x4 AND/full-adder array |
| `mod13_counter` | 0..12 toggle-chain counter, falling edge |
| `wordline_select`, `membership_rom`, `fuzzifier` | input register + exact decoder + mask ROM |
| `minmax_selector`, `bit_selector`, `minmax_unit` | two-input MIN or MAX cell |
| `min4`, `max_tree27`, `inference_engine` | per-rule MIN of four, MAX over 27 rules |
| `dividend_unit`, `divisor_unit` | two-edge accumulators with Register 4 output latch |
| `cas_divider` | non-restoring CAS array divider |
| `defuzzifier` | the two accumulators, the divider and the valid strobe |
| `fuzzy_wash_controller` | top |

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
`tb/fuzzy_ref_pkg.sv` is an independent behavioural model: membership
formulas, the rule table as text, and the centre of gravity. The testbenches
that need expected values use it. With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb \
    rtl/fuzzy_pkg.sv tb/fuzzy_ref_pkg.sv tb/tb_fuzzy_wash_controller.sv \
    --top-module tb_fuzzy_wash_controller --Mdir build
./build/Vtb_fuzzy_wash_controller
```

Replace the testbench name to run another block. The end-to-end test runs
the top at its default parameters. It applies all 1331 grid combinations of
the inputs plus off-grid values and a mid-sweep reset, and checks every
result against the reference model. It also checks the 13-clock strobe
spacing. It counts the mechanisms it exercised and fails if any count is
zero: strobes, counter wraps, zero-divisor results, each of the 27 rules
firing, and every wash-time value the model can produce. It takes a few
seconds.

The block tests cover the following:

* the adder, multiplier, MIN/MAX cells, selector and the 27-input tree:
  exhaustive or randomised;
* the divider: exhaustive over every in-range dividend/divisor pair;
* the counter: sequence and edge;
* the decoder: all 256 inputs and the falling-edge timing;
* the accumulators and defuzzifier: random per-sweep tables, checked
  against the sums and the strobe timing.

## Departures and own choices

The points below are where this RTL differs from the original design, or
fills in what the original leaves open.

* **Membership functions.** Only the Small/Not Greasy/Light table is taken
  from the original. Medium, Large/Greasy/Heavy and the five wash-time
  shapes are reconstructions (see the tables above). Changing them in
  `fuzzy_pkg::rom_word` changes the results. The testbench model in
  `fuzzy_ref_pkg` must then be changed to match.
* **Number of output points.** The original's equation sums over counts 0..12
  (13 terms), but its step-by-step description of the accumulators uses 12
  steps. This RTL sums all 13 points, so `m_0` counts in the divisor.
* **Sweep framing.** The original says only that Register 2 is zero at the
  first step and that Register 4 is enabled when the count is 1100. Here
  Register 2 is cleared at the end of count 11, and the count-12 decode is
  used as Register 4's load enable. The original calls it an output enable.
  Here Register 4 holds its value, so no tri-state output is needed.
* **Counter clear.** The original clears the counter asynchronously when it
  briefly reaches 1101. Here the clear is part of the next-state logic. The
  sequence is the same, but 1101 never appears.
* **MIN/MAX selector.** The original's comparator leaves out bit 0 of operand
  A. That gives wrong answers, for example for 3 vs 2, and for the odd grades
  7 and 3 used here. This comparator uses all 8 bits. Ties go to A.
* **Divider width.** The original describes an 11-bit by 4-bit divider, but
  its divisor accumulator is 8 bits wide. The divisor here is 8 bits. The
  quotient is 4 bits and is truncated.
* **MIN of four.** Three two-input MIN cells, arranged as a balanced tree.
  The original does not fix the arrangement, and it does not change the
  result.
* **Added here:** `rst_n`, the `wash_time_valid` strobe and its suppression
  after reset, the `count` output, and quotient 0 for a zero divisor.
* **Not included:** the pad ring of the 36-pin package (32 signal pins plus
  two Vdd and two Vss), the sensors, and the transistor-level gate library
  and layout. The RTL maps onto standard cells through synthesis. The
  original chip is quoted at about 36,000 transistors and 30 mm² in 0.5 µm
  CMOS. No size or timing figure of this RTL is claimed to match that.
