# Modified dual-CLCG pseudorandom bit generator with a square-root carry-select adder

This is a 32-bit pseudorandom bit generator (PRBG) of the *modified dual coupled
linear congruential generator* (modified dual-CLCG) type. It is meant as the key-stream
source of a lightweight stream cipher. It produces one bit per clock. Its arithmetic
is built for small area. Each of the four linear congruential generators (LCGs) needs
one three-operand addition per step. That addition is done by a row of full adders
followed by a square-root carry-select adder (SRCSA). The SRCSA takes the place of the
larger parallel-prefix three-operand adder that this architecture is usually built with.

## How a bit is made

Four LCGs run in lock step, each modulo 2^32:

    x(i+1) = a1*x(i) + b1      y(i+1) = a2*y(i) + b2
    p(i+1) = a3*p(i) + b3      q(i+1) = a4*q(i) + b4

They form two coupled pairs (CLCGs). Each pair compares its two new states:

    B(i) = x(i+1) > y(i+1)     C(i) = p(i+1) > q(i+1)
    z(i) = B(i) xor C(i)

Combining the two comparator bits with XOR gives a bit on every clock. (Older dual-CLCG
variants drop bits and so have an irregular output rate.)

## One LCG step as a three-operand addition

The multipliers are restricted to `a = 2^R + 1`. This turns the multiplication into a
shift:

    a*s + b = (s << R) + s + b     (mod 2^32)

The shift is only wiring, so one step costs one three-operand addition. `lcg.sv` holds:

* a 2:1 multiplexer that passes the seed while `start` is 1, and otherwise passes the
  register's own output;
* the three-operand adder `adder3`;
* a 32-bit register.

## The three-operand adder (`adder3`)

1. **Bit-addition row.** There is one full adder per bit and no carry passes between
   bits. Each bit gives `s'_i = a_i ^ b_i ^ c_i` and `cy_i = maj(a_i, b_i, c_i)`.
   The three operands are now two: `s'` and `cy << 1`.
2. **Two-operand SRCSA.** It adds `s'` and `cy << 1` with carry-in 0. Every carry that
   leaves bit 31 is dropped, which makes the result modulo 2^32.

## The square-root carry-select adder (`srcsa`)

This is the part that saves area and delay, and the part that is hardest to read in the
code. The operands are cut into blocks that grow towards the most significant end. At
16 bits the cut is 2-2-3-4-5:

| block | bits    | adders                      | selected by |
|-------|---------|-----------------------------|-------------|
| 0     | [1:0]   | one 2-bit RCA, carry-in `cin` | -         |
| 1     | [3:2]   | two 2-bit RCAs (cin 0 and 1)  | C1        |
| 2     | [6:4]   | two 3-bit RCAs                | C2        |
| 3     | [10:7]  | two 4-bit RCAs                | C3        |
| 4     | [15:11] | two 5-bit RCAs                | C4 → `cout` |

Every block above block 0 works out its sum twice, in parallel: once assuming a carry-in
of 0 and once assuming 1. A 2:1 multiplexer then takes the sum and carry-out of the
right copy, using the real carry from the block below. The carries only pass through
one multiplexer per block and never ripple through the higher blocks. Each higher block
has one more bit, so it has one more full-adder delay to spend. That matches the extra
multiplexer delay its selecting carry has already gone through. The cut is ideal when a
full adder and a multiplexer have about the same delay.

The block sizes are not hard-coded. The functions in `prbg_pkg.sv` compute them at
elaboration:

* block 0 is 2 bits and block k (k ≥ 1) is k+1 bits;
* the last block is cut short to the bits that remain.

The 32-bit adder inside `adder3` is therefore cut 2-2-3-4-5-6-7-3. The 16-bit cut
follows the reference architecture. The rule for other widths is this design's own. A
reader who wants another cut (for example folding the last 3 bits into the 7-bit block)
only needs to change `srcsa_nominal`/`srcsa_size`.

`rca.sv` is a plain chain of `full_adder` cells.

## Interface and timing (`mdclcg`, the top)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock; all state changes on the rising edge |
| `rst_n` | in | 1 | asynchronous active-low reset: all LCG registers to 0, `valid` to 0 |
| `start` | in | 1 | 1 = load the seeds; also restarts a running sequence |
| `x0`,`y0`,`p0`,`q0` | in | 32 | seeds of the four LCGs |
| `b1`..`b4` | in | 32 | increments; use odd values |
| `z` | out | 1 | pseudorandom bit |
| `valid` | out | 1 | `z` holds a generated bit (1 from the first clock with `start` on) |

Sequence:

* In the cycle where `start` is 1, each register already loads `a*seed + b`.
* On the next cycle `z` = z(0) and `valid` = 1.
* After that, one new bit appears on every clock, with no stalls.
* `start` may be held for several cycles. The sequence then restarts from the seeds on
  each of those cycles.
* The seeds and increments are read only while `start` is 1. The increments are read on
  every cycle, so keep them stable while bits are being produced.

Parameters, all with defaults:

| parameter | default | meaning |
|-----------|---------|---------|
| `WIDTH` | 32 (`prbg_pkg::PRBG_WIDTH`) | LCG word size, modulus 2^WIDTH |
| `R1`..`R4` | 2, 3, 4, 5 | multipliers a = 5, 9, 17, 33 |

The 32-bit width comes from the reference architecture. It is the size at which the
modified dual-CLCG is reported to be unpredictable in polynomial time. The multiplier
and increment values are not given there and were chosen for this design. By the
Hull–Dobell conditions, an LCG modulo 2^n reaches its full period 2^n when `a - 1` is a
multiple of 4 (R ≥ 2) and `b` is odd. The defaults meet the first condition, and the
increments must be chosen to meet the second.

Module hierarchy:

    mdclcg
    ├── clcg u_clcg1 (x, y → B)      clcg u_clcg2 (p, q → C)
    │   ├── lcg ×2
    │   │   └── adder3
    │   │       ├── full_adder ×WIDTH      (bit-addition row)
    │   │       └── srcsa
    │   │           └── rca (1 + 2 per higher block) → full_adder
    │   └── mag_comp
    └── XOR, valid flag

## Where this design departs from, or adds to, the reference architecture

* **Path from three operands to the SRCSA.** The reference uses an SRCSA made of RCAs
  and multiplexers for the three-operand modulo-2^n addition, but does not spell out how
  three operands reach a two-operand adder. The carry-save row of full adders used here
  is the usual way to do it, and uses the same bit-addition equations as the
  parallel-prefix three-operand adder it replaces.
* **Multipliers are parameters.** In the reference drawing each LCG has an `a` input.
  Here `a` is fixed at elaboration through `R`, so that the `(s << R)` term stays free
  wiring. A run-time `a` would need a barrel shifter.
* **Comparator direction.** Both comparators compute "greater than". The reference only
  calls them magnitude comparators.
* **`start` polarity, reset and `valid`** are this design's own choices.
* **Block cut above 16 bits** (see above).
* **Area not reproduced.** The reference reports FPGA results for the whole generator:
  646 LUTs with the SRCSA against 715 with a Han-Carlson three-operand adder. No FPGA
  flow was run on this code, so it makes no claim about those numbers.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares against values
the testbench computes itself with ordinary arithmetic, and ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_rca` | exhaustive at 2 and 5 bits |
| `tb_srcsa` | 16 and 32 bits: carries started at every bit position, full-length ripples, 20 000 random triples each |
| `tb_adder3` | 32 and 16 bits: all-ones and top-bit overflow cases, 30 000 random triples |
| `tb_mag_comp` | equal values, single-bit differences in both directions, random pairs |
| `tb_lcg` | reset value; value one clock after `start` (latency); a new value on every following clock; 20 restarts; R = 2 and R = 5 |
| `tb_clcg` | both states and the comparator bit on every clock over 10 seeded runs; the bit takes both values |
| `tb_mdclcg` | the top at its defaults: see below |

`tb_mdclcg` is the end-to-end test:

* It starts from reset with all four seeds equal to 1, then restarts eight times with
  random seeds and odd increments.
* It resets once in mid-stream.
* On every clock it compares `z` and `valid` with a software model, so the one-clock
  latency and the one-bit-per-clock rate are checked on every bit.
* It counts each mechanism: seed load, restart while running, reset while running, and
  B, C and z at each value. A mechanism that never happens is a failure.
* It requires the share of ones in the 19 000 generated bits to lie between 45 % and
  55 %.

This is a sanity check only, not a randomness test suite such as NIST SP 800-22.

To run a testbench with Verilator 5:

    verilator --binary --timing -Wall -Wno-fatal --top-module tb_mdclcg \
        -y rtl -y tb +libext+.sv rtl/prbg_pkg.sv tb/tb_mdclcg.sv
    ./obj_dir/Vtb_mdclcg

Replace `tb_mdclcg` with any other testbench name. Every testbench finishes in well under
a second.

## Lint notes

Verilator `-Wall` reports a few unused signals, and these are intentional:

* In `adder3`, the carry out of the top bit of the full-adder row and the SRCSA's
  `cout` are dropped. That is the modulo reduction.
* In `mdclcg`, the LCG states are used only inside the comparators and are not brought
  out.
