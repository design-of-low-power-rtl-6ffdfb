# Low-power test pattern generation with a reconfigurable Johnson counter and an accumulator

During built-in self-test, switching power goes up when consecutive test patterns differ in many
bit positions. This design produces test patterns that change slowly. A reconfigurable Johnson
counter produces vectors that hold a single run of ones: the run is either walked around the
register or widened by one bit. An accumulator adds these vectors up. Each pattern is the previous
one plus a vector with one run of ones, so neighbouring patterns are closely related. The
generator drives a test-per-clock BIST of a 4x4 multiplier. The BIST applies one 8-bit pattern
per clock and compares the product with a fault-free copy. After 12 patterns it reports pass or
fail. A stuck-at fault can be injected on any multiplier input line, to see which faults the
pattern set detects.

All RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. Each testbench checks its own
results.

## The generator

```
 mode_sel ──► reconfigurable ──J──► Register B ──B──► adder ──S──► Register A ──► A_out (pattern)
              Johnson counter                         ▲   ▲           │
                                                      │   └── carry ◄─┤ (carry flip-flop)
                                                      └───────────────┘
```

Every clock the registers update as follows:

```
J <= next Johnson vector (chosen by mode_sel)
B <= J
A <= A + B + C            C <= carry out of that addition
```

A vector from the counter therefore reaches the pattern two clocks later. The carry of one
addition is kept in a flip-flop. It enters the next addition as carry-in.

### Counter modes

Bit J0 is the leftmost printed bit and the MSB of `jn_cw`. Bits move from J0 towards J(l-1).

| `mode_sel` | mode           | next vector                           | example                    |
|------------|----------------|---------------------------------------|----------------------------|
| `00`       | initialization | all zeros                             | anything → `00000000`      |
| `10`       | normal Johnson | shift right, inverted J(l-1) into J0  | `00000000` → `10000000`, `10000000` → `11000000` |
| `01`       | circular shift | shift right, J(l-1) into J0           | `10000000` → `01000000` → `00100000` |
| `11`       | hold           | unchanged (this design's own code)    |                            |

### The mode sequence and the patterns it produces

A test needs a known start. For one clock the controller puts the counter in initialization mode.
In the same clock Register A is loaded with its start value `INIT_A` (default 0), and Register B
and the carry are cleared. The controller then repeats groups of L+1 = 9 clocks: one normal step,
then 8 circular shifts. The normal step adds a one to the run. The shifts walk the run all the way
round, back to where it started, and then the next normal step widens it. The run clocks of one
test, from the default start value:

| run clock | mode   | J (counter) | B        | C | A = pattern | operands, product |
|-----------|--------|-------------|----------|---|-------------|-------------------|
| 0  | normal | 00000000 | 00000000 | 0 | 00000000 | 0 × 0 = 0 |
| 1  | shift  | 10000000 | 00000000 | 0 | 00000000 | 0 × 0 = 0 |
| 2  | shift  | 01000000 | 10000000 | 0 | 00000000 | 0 × 0 = 0 |
| 3  | shift  | 00100000 | 01000000 | 0 | 10000000 | 8 × 0 = 0 |
| 4  | shift  | 00010000 | 00100000 | 0 | 11000000 | 12 × 0 = 0 |
| 5  | shift  | 00001000 | 00010000 | 0 | 11100000 | 14 × 0 = 0 |
| 6  | shift  | 00000100 | 00001000 | 0 | 11110000 | 15 × 0 = 0 |
| 7  | shift  | 00000010 | 00000100 | 0 | 11111000 | 15 × 8 = 120 |
| 8  | shift  | 00000001 | 00000010 | 0 | 11111100 | 15 × 12 = 180 |
| 9  | normal | 10000000 | 00000001 | 0 | 11111110 | 15 × 14 = 210 |
| 10 | shift  | 11000000 | 10000000 | 0 | 11111111 | 15 × 15 = 225 |
| 11 | shift  | 01100000 | 11000000 | 1 | 01111111 | 7 × 15 = 105 |

From run clock 2 to run clock 11, each pattern differs from the one before in a single bit. The
first overflow comes at `11111111 + 10000000`. It leaves a carry of 1 for the next addition. After that, patterns change in more bits.

## The BIST around the generator

| module              | role |
|---------------------|------|
| `bist_controller`   | Waits for `start`, then runs 1 initialization clock and `TEST_LEN` = 12 run clocks. It drives `mode_sel` and `init`, counts patterns (`pat_cnt`) and latches a mismatch as `fail`. |
| `tpg_accum`         | The generator: `rjc`, `reg_b`, `accum_adder`, `reg_a`. |
| `fault_inject`      | Forces one multiplier input line to 0 or 1, selected by `fault_sel`. |
| `mult4x4` (×2)      | The circuit under test, fed through the fault injector, and a fault-free copy that gives the expected product. |
| `response_analyzer` | `diff = ref_out ^ test_out`; `mismatch` when comparison is enabled and `diff` is non-zero. |

**Operands.** The left four bits of the printed pattern are the first operand and the right four
the second. For example, `01111000` is 7 × 8.

**Fault code** (`fault_sel`, 6 bits):

- `fault_sel[4:0]` is the faulty input line, 1 to 8, counted from the left of the printed pattern.
  Line k is `pattern[8-k]`. A value of 0, or above 8, injects no fault.
- `fault_sel[5]` is the stuck value: 0 for stuck-at-0, 1 for stuck-at-1.

Example: code `000010` is stuck-at-0 on line 2. Pattern `01111000` then reaches the faulty
multiplier as `00111000`. The products are `ref_out = 00111000` (56) and `test_out = 00011000`
(24), so `diff = 00100000`.

**Timing.** Patterns are applied test-per-clock. The pattern in Register A feeds both multipliers
and the comparator directly, and the result is checked in the same clock. `done` rises
1 + `TEST_LEN` clocks after the clock that samples `start`. It stays high, with `pass` or `fail`,
until the next `start`. A `start` while a test runs is ignored. `rst` is synchronous and active
high.

**Top-level ports of `bist_top`:**

- Inputs: `clk`, `rst`, `start`, `fault_sel[5:0]`.
- Outputs for observation: `pattern`, `jn_cw`, `mode_sel`, `ref_out`, `test_out`, `diff`,
  `pat_cnt`.
- Verdict outputs: `busy`, `done`, `pass`, `fail`.

## Fault coverage and the start value

The fault list used here has 16 faults: each of the 8 multiplier input lines, stuck at 0 and stuck
at 1. With the default start value 0, the 12 patterns above detect 13 of them. Lines 2, 3 and 4
stuck-at-1 are missed. Among the patterns with a non-zero second operand, only `01111111` has a
zero in lines 1 to 4, and that zero is on line 1. The start value is a parameter (`INIT_A` on `bist_top`,
`tpg_accum` and `reg_a`). With `INIT_A = 8'b01010101` the same 12-clock test detects all 16 faults.
`tb_bist_coverage` checks this. The default stays 0 because the published waveform of the original
generator starts from an all-zero pattern. Set `INIT_A` to another value if full input coverage
within 12 patterns matters more.

## What follows the original design and what is this design's own

These parts follow the original design:

- The Johnson counter / Register B / adder / Register A structure, with feedback of A and of the
  previous carry.
- The 8-bit width and the 4x4 multiplier under test.
- The three counter modes and their `mode_sel` codes.
- The test length of 12.
- The 6-bit fault code and its example value.
- The comparator output as the XOR of expected and observed products.

These choices are this design's own:

- Hold mode on code `11`.
- The synchronous active-high reset.
- The start value 0.
- Clearing Register B and the carry in the initialization cycle.
- Keeping the carry in a flip-flop beside Register A.
- The controller and its grouping of one normal step with L circular shifts. This grouping is
  read from the published waveform, in which the walking one returns to `10000000` before a
  normal step widens it to `11000000`.
- The field layout of the fault code.
- The array structure of the multiplier.
- Taking the expected response from a golden multiplier copy. The original test set-up does the
  same; a production BIST would store the expected responses or compress them into a signature.

Not included:

- The generator that the design is compared against: a Johnson counter XORed with a seed shift
  register, feeding scan chains through separate clocks CLK1/CLK2.
- Any area, power or delay figures. Those depend on the target technology.

## Files

`rtl/` holds one module or package per file:

- `tpg_pkg.sv`: widths, test length, counter mode enum.
- `rjc.sv`, `reg_b.sv`, `accum_adder.sv`, `reg_a.sv`, `tpg_accum.sv`: the generator.
- `bist_controller.sv`, `fault_inject.sv`, `mult4x4.sv`, `response_analyzer.sv`: the BIST parts.
- `bist_top.sv`: the top.

`tb/` holds one self-checking testbench per module. Each prints
`TB_RESULT checks=N failures=M`. There are two system-level testbenches:

- `tb_bist_top` runs, at the default parameters, a fault-free test, each of the 16 input faults,
  the example code and two codes that name no line. It compares every pattern, product and
  verdict with a model inside the testbench. It also counts initialization, normal steps,
  circular shifts, carries, mismatches, passes and fails, and fails if any of them never happened.
- `tb_bist_coverage` repeats the fault runs with start value `01010101` and requires 16 of 16
  faults detected.

## Simulating

With Verilator 5, for example for the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/tpg_pkg.sv tb/tb_bist_top.sv --top-module tb_bist_top -Mdir obj_tb_bist_top -o sim
./obj_tb_bist_top/sim
```

Replace `tb_bist_top` with any other testbench name. Each run finishes in well under a second.
The widths can be changed through the `L` parameter of every module, and the test length through
`TEST_LEN`. The testbenches' hand-worked pattern lists assume the defaults.
