# Vedic multiplier arithmetic unit

This design multiplies two 256-bit unsigned numbers in one combinational pass,
using the *Urdhva Tiryakbhyam* ("vertically and crosswise") method of Vedic
arithmetic. A 2x2-bit multiplier made of four AND gates and two half adders is
the only place where bits are multiplied. Every larger multiplier is four
copies of the next smaller one plus a few adders, so a 256x256 multiplier is
a seven-level tree of 4^7 = 16384 such 2x2 cells. The multiplier sits in a
small arithmetic unit that also gives the sum, the difference and a running
multiply-accumulate (MAC) total of the same two operands.

Next to it is a second, independent multiplier after the *Nikhilam* sutra
("all from nine and last from ten"). It multiplies two numbers through their
distances from a nearby power of two. That turns one wide product into a
shift plus a product of two residues.

Everything is combinational except the MAC accumulator.

## Block overview

```
vedic_top
├── arith_unit (N = 256)
│   ├── vedic_mult (N = 256)                 product = a * b
│   │   └── 4 x vedic_mult (128) ... 4 x vedic_mult (16)
│   │        └── vedic_8x8 -> vedic_4x4 -> vedic_2x2 (AND + half_adder)
│   │       adders: rca (ripple carry, of full_adder), csa (carry save)
│   ├── addsub (add)                         sum = a + b
│   ├── addsub (subtract)                    difference, borrow
│   └── mac (P = 512)                        acc += product, once per clock
└── nikhilam_mult (N = 16)
    ├── rsu                                  base 2^k, residue1 = x - 2^k
    ├── addsub                               residue2 = y - 2^k
    ├── addsub, shifter                      (x + residue2) << k
    ├── addsub x2, vedic_mult (16)           |residue1| * |residue2|
    └── addsub                               final add or subtract
```

Every file in `rtl/` holds one module. Its opening comment gives the
function, ports and timing.

## The 2x2 cell

For a = a1a0 and b = b1b0 the product bits are formed column by column:

| bit | formed as |
|-----|-----------|
| q0  | a0·b0 (vertical) |
| q1  | a1·b0 + a0·b1 (crosswise), half adder, carry c1 |
| q2  | a1·b1 + c1 (vertical), half adder |
| q3  | carry out of q2 |

## Combining four products: 4x4 and 8x8

Split each operand into halves, a = {AH, AL} and b = {BH, BL}, with H = N/2:

    a*b = AH·BH·2^N + (AH·BL + AL·BH)·2^H + AL·BL

The 4x4 and 8x8 blocks (`vedic_4x4`, `vedic_8x8`) combine the four sub-products
in two stages:

1. A carry save adder (`csa`) reduces three N-bit numbers to a sum word and a
   carry word. The three numbers are AH·BL, AL·BH and the upper half of AL·BL.
   A ripple carry adder then adds the two words. The result is N+1 bits wide.
   Its low H bits are product bits q[N-1:H].
2. The upper H+1 bits of that result are added to AH·BH, giving q[2N-1:N].

The low H bits of AL·BL are q[H-1:0] as they are.

Three N-bit operands can sum to N+1 bits. Stage 2 must therefore take bits
N..H of the stage-1 result, not just N-1..H. Dropping the top bit gives wrong
answers, for example 255·255.

## Combining four products: 16x16 to 256x256

`vedic_mult` is parameterised by N. For N = 2, 4 and 8 it instantiates the
dedicated block. For N >= 16 it instantiates itself four times at N/2 and
adds the results with three ripple carry adders:

| name | what it computes | adder width | at N = 256 |
|------|------------------|-------------|------------|
| q0 | AL·BL | (sub-multiplier) | 256 bits |
| q1 | AH·BL | (sub-multiplier) | 256 bits |
| q2 | AL·BH | (sub-multiplier) | 256 bits |
| q3 | AH·BH | (sub-multiplier) | 256 bits |
| q4 | q1 + q0[N-1:H] | N | 256 |
| q5 | {q3, H zeros} + q2 | 3H | 384 |
| q6 | q5 + q4 | 3H | 384 |
| c  | {q6, q0[H-1:0]} | | 512 |

None of the adders can overflow, so their carry outputs are unused:

- q4 ≤ (2^H−1)² + 2^H − 1 < 2^N.
- q5 and q6 are bounded by a·b / 2^H < 2^(3H).

The low H bits of the q5 adder always add zeros to q2's low bits. They are
kept, so that every level uses the same two adder widths.

Per level the adders take 4N full adders. At N = 256 the whole tree comes to
about 110k full adders, 33k half adders and 65k AND gates. That is roughly
480k two-input gates after generic synthesis. The critical path runs through
the ripple chains of every level, which is the price of the regular,
all-ripple structure.

The 8x8 and 256x256 arrangements are the ones described for this multiplier.
Three things are this design's own choices:

- the 4x4 level uses the 8x8 arrangement;
- the 16 to 128-bit levels use the 256-bit arrangement;
- all two-operand adders are ripple carry adders.

## Adders

- `full_adder`: one-bit full adder. `half_adder`: one-bit half adder.
- `rca`: W-bit ripple carry adder, a chain of full adders. Each stage keeps
  its carry in its own generate scope, so the chain is a set of separate
  one-bit nets rather than one vector that feeds itself.
- `csa`: a row of W full adders with no carry between bits.
  x + y + z = s + 2c.
- `addsub`: an `rca` with b XOR-ed with `sub` and `sub` used as the carry in.
  With sub = 1, `cout` = 1 means no borrow.

## Arithmetic unit and MAC

`arith_unit` drives all four results at once; there is no operation select:

| output | width | value | timing |
|--------|-------|-------|--------|
| `product` | 2N | a·b | combinational |
| `sum` | N+1 | a + b | combinational |
| `difference` | N | a − b mod 2^N | combinational |
| `borrow` | 1 | a < b | combinational |
| `acc` | 2N | Σ a·b over enabled cycles | registered |

The same multiplier feeds `product` and the MAC.

`mac` updates on each rising edge of `clk`:

- `acc_clr` = 1: the accumulator is cleared. This takes priority.
- otherwise, `acc_en` = 1: a·b is added.
- otherwise the accumulator holds its value.

An asynchronous active-low `rst_n` also clears it. The accumulator is one
product wide (512 bits) and wraps modulo 2^512. A product presented in one
cycle is in `acc` right after the next rising edge. This gives one
accumulation per cycle and one cycle of latency.

The clock, reset, clear, enable, accumulator width and output widths are this
design's choices. Only the set of operations is given.

## Nikhilam multiplier

With a base R = 2^k:

    x·y = (x + (y − R))·R + (x − R)·(y − R)

The first term is a shift. The second is a product of two residues, which are
small when x and y lie close to R. Decimal example: 92·94 with base 100. The
residues are −8 and −6, and 92 − 6 = 86. The product is 86 × 100 + 48 = 8648.

The datapath of `nikhilam_mult` (default N = 16) works as follows:

1. `rsu` picks k from x. Let p be the position of the leading one of x. If
   the bit below it is set (x ≥ 1.5·2^p), the base is rounded up to
   2^(p+1). This is the nearest power of two, taking the larger one on a
   tie. k is capped at N−1, and x = 0 gives k = 0. `rsu` outputs k, R and
   residue1 = x − R.
2. A subtractor forms residue2 = y − R (N+1 bits, two's complement).
3. An adder forms t = x + residue2 (N+2 bits, signed). `shifter` (a
   logarithmic shifter) computes t << k.
4. Both residues are converted to magnitudes, which are multiplied by an NxN
   `vedic_mult`. The cap on k guarantees |residue1| < 2^(N−1) and
   |residue2| < 2^N.
5. A final add/subtract combines (t << k) with the residue product. It
   subtracts when exactly one residue is negative.

`exponent` outputs k.

The sequence of blocks is the one given for this multiplier: radix
selection, subtractor, adder/subtractor, shifter, multiplier,
adder/subtractor. This design chose three things:

- the binary base rule;
- working on magnitudes with an unsigned multiplier;
- the 16-bit width.

## Top-level interface (`vedic_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | MAC clock, asynchronous active-low reset |
| a, b | in | N | arithmetic-unit operands |
| acc_clr, acc_en | in | 1 | MAC clear / accumulate at the next edge |
| product | out | 2N | a·b |
| sum | out | N+1 | a + b |
| difference, borrow | out | N, 1 | a − b mod 2^N, a < b |
| acc | out | 2N | accumulated products |
| nk_x, nk_y | in | NK_N | Nikhilam operands |
| nk_p | out | 2·NK_N | nk_x·nk_y |
| nk_exponent | out | clog2(NK_N) | k of the chosen base |

The parameters are N = 256 and NK_N = 16. `vedic_mult` needs N to be a power
of two; `nikhilam_mult` needs NK_N to be a power of two, at least 4.

## Verification

Every module except `half_adder`, which is covered through `vedic_2x2`, has a
self-checking testbench in `tb/`. Each one compares
against reference values computed directly in SystemVerilog, and each ends
by printing `TB_RESULT checks=… failures=…`.

| testbench | what it covers |
|-----------|----------------|
| tb_full_adder | all 8 input combinations |
| tb_rca | all 8-bit operand pairs with both carries in; random 37-bit operands |
| tb_csa | bitwise words and x+y+z = s+2c, random |
| tb_vedic_2x2, _4x4, _8x8 | every operand pair |
| tb_vedic_mult | every width N = 2, 4, 8, 16, 32, 64 on the same operands; corners, 325·738, 92·94, 20k random pairs |
| tb_addsub | 256-bit, both modes, corners and random |
| tb_mac | 512-bit; latency, hold, clear, asynchronous reset, wrap-around |
| tb_rsu | every 16-bit input against a scan over all bases |
| tb_shifter | every shift amount |
| tb_nikhilam_mult | 16-bit; 92·94, bases and their neighbours, 100k random pairs; all four residue-sign cases must occur |
| tb_arith_unit | N = 16; all outputs, MAC against a model |
| tb_vedic_top | whole design, arithmetic unit at N = 32; 20k cycles, one operation per cycle; counts carry, borrow, accumulate, hold, clear, wrap, base rounded up/down and negative residue product, and fails if any never occurs |

To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb tb/tb_vedic_top.sv \
              --top-module tb_vedic_top -o sim && ./obj_dir/sim

The bit-level netlist makes the C++ large. Building a 32- or 64-bit
multiplier testbench takes about a minute. The 256-bit build is far larger;
see the status note below.

## Status of the full-size simulation

No testbench here simulates the arithmetic unit at its default N = 256. The
design flattens to about 480k gates, and Verilator turns that into roughly
300 MB of C++. Compiling it takes far longer than a routine test run. The
largest sizes simulated are:

- the multiplier alone at N = 64 (`tb_vedic_mult`);
- the whole design with a 32-bit arithmetic unit (`tb_vedic_top`).

The 16-bit Nikhilam multiplier is simulated at its default size. Every level
of the 256-bit tree is the same parameterised code as the simulated 16 to
64-bit levels. The only parts specific to N = 256 are the adder widths (256
and 384 bits) and the 512-bit accumulator. The adders are the same
ripple-carry code that is tested at 8, 37 and 256 bits (`tb_rca`,
`tb_addsub`). The accumulator passes at its full 512 bits in `tb_mac`.

Tool cost at N = 256, for reference: a Verilator lint of `vedic_top` peaks
at about 6.3 GB of memory and takes just over a minute. Generic yosys
synthesis of `vedic_mult` takes about 5 GB and 5 minutes. Lint memory grows
roughly fourfold per doubling of N: 0.4 GB at 64, 1.6 GB at 128.

## Departures and open points

- The adder types inside the 16 to 256-bit levels are not specified; ripple
  carry adders are used. A faster final adder (carry look-ahead or carry
  select) would shorten the critical path. Such an adder can replace `rca`
  in `vedic_mult` without other changes.
- One block diagram of the small multiplier shows a clock input next to
  4-bit operand ports. The synthesis results, however, describe the
  multiplier as having no clock at all. This design follows the latter:
  every multiplier is purely combinational, and only the MAC is clocked.
- The Nikhilam base is chosen from x alone. Choosing it from the larger of
  the two operands would keep the residues smaller when y is much larger
  than x, at the cost of a comparator and an operand swap. The product is
  exact with either rule.
- The Nikhilam multiplier and the Vedic arithmetic unit are not connected to
  each other. They stand side by side in `vedic_top`.
- Timing and FPGA utilisation figures (delays in ns, slices, LUTs) belong to
  a specific FPGA flow and are not reproduced by this RTL.
- Verilator's lint, run with `vedic_mult` itself as the top module, reports
  the four sub-products as undriven. This comes from the module
  instantiating itself. Any instance inside a design elaborates fully, and
  the testbenches check the products at N = 2, 4, 8, 16, 32 and 64.
