# Moore FSM with pseudoequivalent-state classes

A Moore finite state machine spends a lot of logic on its next-state
equations because every state has its own transitions, even when several
states lead to exactly the same places under exactly the same conditions.
Such states are *pseudoequivalent*: they differ only in the outputs
(microoperations) they issue, not in where they go next. If the next-state
logic is written per **class** of pseudoequivalent states rather than per
state, the number of product terms drops to roughly that of the equivalent
Mealy machine. This matters on PAL-based CPLDs, where a macrocell offers only
a few product terms (about 5) but a wide fan-in (more than 20 inputs), so
fewer terms means fewer cells and fewer logic levels.

The question is then how the next-state logic learns the class of the
current state. This design uses two sources:

* **From the state register itself.** The state codes are chosen so that all
  states of a class form one generalized interval of the code space (a cube
  with don't-care positions). The class is then a single product term on the
  register outputs, and no extra logic is needed.
* **From a code transformer (BCT).** For classes that cannot be put into one
  interval, a small combinational block converts the state code into a class
  code `tau`.

Which classes use which source is set by one parameter. If every class is an
interval, the code transformer disappears altogether.

The RTL implements this structure for one complete control algorithm, called
G1 below, with six states. That example is fully specified, and it is the
configuration the RTL builds by default.

## The control algorithm G1

Conditions `x1..x3`, microoperations `y1..y4`, states `a1..a6`, with `a1` the
initial state (the start and end of the algorithm).

| state | code T1 T2 T3 | microoperations | class |
|-------|---------------|-----------------|-------|
| a1    | 000           | none            | B1    |
| a2    | 001           | y1 y2           | B2    |
| a3    | 011           | y3              | B2    |
| a4    | 101           | y4              | B2    |
| a5    | 010           | y2 y4           | B3    |
| a6    | 110           | y3              | B3    |

Codes 100 and 111 are unused.

The state transition graph has 11 edges. Per class it is only 6 rows:

| class | interval | condition   | next state |
|-------|----------|-------------|------------|
| B1    | `*00`    | x1          | a2         |
| B1    |          | !x1 x2      | a3         |
| B1    |          | !x1 !x2     | a4         |
| B2    | `**1`    | x3          | a5         |
| B2    |          | !x3         | a6         |
| B3    | `*10`    | (always)    | a1         |

The codes above put each class into one interval, which is why the default
build needs no code transformer. Every run of the algorithm is
`a1 -> {a2,a3,a4} -> {a5,a6} -> a1` and takes three clocks.

## Structure

```
 x ----------------------+
                         v
 +-----+   tau     +------+   d   +----+   t
 | BCT |---------->| BIMF |------>| RG |-----+----> BMO ----> y
 +-----+           +------+       +----+     |
    ^                  ^                     |
    +------------------+---------------------+
```

| module | role |
|--------|------|
| `fsm_g1_pkg` | Sizes, the two tables above, types, and the class-code functions. |
| `fsm_rg` | State register. `start` loads `a1` (000); otherwise it loads `d` on every rising clock edge. |
| `fsm_bimf` | Next-state logic (block of input memory functions). Finds the current class, then ORs in the next-state code of the one table row that fires. |
| `fsm_bct` | Code transformer. State code to class code `tau`, written as a sum of state minterms. |
| `fsm_bmo` | Microoperation logic. `y_n` is the OR of the minterms of the states that issue `y_n`. |
| `moore_fsm_u4` | Top level. Wires the blocks together and builds the BCT only when some class needs it. |

### Top-level interface (`moore_fsm_u4`)

| port    | dir | width | meaning |
|---------|-----|-------|---------|
| `clk`   | in  | 1 | clock; every rising edge makes one state transition |
| `start` | in  | 1 | synchronous; loads `a1` and overrides the next-state logic |
| `x`     | in  | [1:3] | conditions; `x[1]` is x1 |
| `y`     | out | [1:4] | microoperations of the current state; `y[1]` is y1 |
| `t`     | out | [1:3] | current state code; `t[1]` is T1 |

`x` is sampled on the rising edge. `y` is a combinational function of the
register, as Moore outputs are. It is valid in the same cycle the state is
entered.

Buses use ascending ranges (`[1:n]`), so that index n always names bit n in
the equations (`t[1]` is T1, the leftmost bit of a code). Verilator's `-Wall`
therefore reports `ASCRANGE` warnings. They are intended.

## Choosing the class-code source: `PI_C`

`PI_C` is a bit set over the classes: bit `i-1` set means class `B_i` is
recognised from `tau` rather than from its interval.

* `3'b000` (default): no class uses the transformer. No BCT is built, and `tau` is a
  constant 0 that the BIMF ignores.
* Mixed, e.g. `3'b010`: `tau` has `R_C = ceil(log2(|PI_C| + 1))` bits. Code 0 means
  "not one of the transformed classes". The transformed classes get codes
  1, 2, ... in class order. This numbering is a choice of this design.
* `3'b111`: every class goes through the BCT. `tau` has `ceil(log2 3) = 2` bits,
  with B1 = 00, B2 = 01 and B3 = 10. With these codes,
  `tau1 = a5 | a6 = T2 !T3` and `tau2 = a2 | a3 | a4`.

Every value of `PI_C` gives the same behaviour, cycle for cycle. Only the
logic changes. For G1, anything other than the default only adds logic. The
option exists because, in a machine whose classes cannot all be made into
intervals, the mixed form is the one that pays off.

The top makes two checks at elaboration:

* Each next-state function still fits the fan-in of one macrocell:
  `L + R + R_C <= S`, with `S = 21`.
* Each microoperation fits the product terms of one macrocell, so the output
  logic costs exactly one cell per microoperation. The check counts the
  states that issue the microoperation, which is an upper bound on its
  product terms, and requires at most `q = 5`.

## Behaviour outside the algorithm

* Before the first `start` the register content is whatever the flip-flops
  power up with. Always pulse `start` first.
* The unused codes are not trapped, and with the default `PI_C` they
  behave as follows:
  * 100 falls into B1's interval and behaves like `a1`, but issues no
    microoperations.
  * 111 falls into B2's interval and moves to `a5` or `a6`.
  * A Moore FSM started with `start` never reaches either code.
* With a non-default `PI_C`, an unused code may match no class. The next
  state is then 000 (`a1`).

## What is simplified or left out

* **Refined state assignment is not applied.** Swapping the codes of `a2` and
  `a3` would let `y2` use one product term instead of two, and
  the intervals would still hold. The RTL keeps the codes listed above. To
  change them, edit the `K_A` table in `fsm_g1_pkg`. Nothing else depends on
  the code values except the class intervals (`CLASS_IV`).
* **No macrocell mapping.** The RTL is technology-independent. Packing it
  into PAL macrocells with q product terms each is left to a CPLD fitter,
  and so are the cell counts such a flow reports.
* **Only G1 is built.** The modules are table-driven. Another machine needs new
  tables in `fsm_g1_pkg`:
  * sizes;
  * `K_A`, `Y_A`, `CLASS_OF`;
  * `CLASS_IV`;
  * `RST`.
  Nothing else is tied to G1, but no other machine has been tried.
* `start` is synchronous. An asynchronous load would be just as valid.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops on a watchdog if it hangs.

| testbench | what it checks |
|-----------|----------------|
| `tb_fsm_rg` | 500 random cycles: the register takes `d`, or `a1` when `start` is high, one clock later. |
| `tb_fsm_bmo` | `y` for all six state codes. |
| `tb_fsm_bct` | `tau` for all six states with the three sets of transformed classes (all, B2 only, B1 and B3). |
| `tb_fsm_bimf` | All 6 states × 8 condition values with four `PI_C` settings. The all-`tau` instance sees a random state code and must ignore it. |
| `tb_moore_fsm_u4` | Four tops (`PI_C` = 000, 010, 101, 111) run side by side for 4000 random cycles with random `start` pulses. Each is compared with a reference model after every clock. The test counts every transition, every start, every complete pass (each must take 3 clocks) and each class-code source, and fails if any never happened. |
| `tb_moore_fsm_u4_full` | The top at its default parameters, taken through all six paths of the algorithm. |

The expected values in every testbench are written out per state, from the
tables above. None comes from the package.

To run one testbench with Verilator:

```
verilator --binary --timing -Wno-ASCRANGE -y rtl rtl/fsm_g1_pkg.sv \
    tb/tb_moore_fsm_u4.sv --top-module tb_moore_fsm_u4 -Mdir obj
./obj/Vtb_moore_fsm_u4
```

Pass the package file first. `-y rtl` finds the other modules by name.
