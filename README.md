# Self-testing N-bit adder built from polymorphic 2-bit blocks

This is an N-bit carry-propagate adder that can test itself in six clock
cycles, however wide it is. It is put together from 2-bit full-adder blocks.
In each block five of the gates are *polymorphic*: a control input can turn
each of them into a different logic function. In normal operation the gates
make the block an ordinary 2-bit adder. For test, the block is switched
through three other configurations. In those configurations two fixed input
vectors are enough to expose the block's stuck-at faults, where an ordinary
adder block would need many vectors.

The two vectors are bitwise complements of each other, so the pattern
generator is a single flip-flop. All blocks get the same vector at the same
time and should give the same answer. One 18-bit reference ROM, one
generator and one control unit therefore serve any number of blocks. Only
the input multiplexers and comparators grow with the width, one of each per
block.

The design follows the architecture of "A New Efficient Scalable BIST Full
Adder using Polymorphic Gates". The block's gate arrangement, its four
configurations and the test procedure come from that source. It does not
give the encodings, the timing of the control unit, the vector bit order,
the ROM contents or the fixed gate types, so those are choices made here.
They are listed under "Choices made in this RTL" below.

## Polymorphic gates

A physical polymorphic gate changes its function with an analog control
(a control voltage or the supply voltage). Here each gate has a 2-bit mode
input instead (`pg_pkg`):

| gate | module | modes (code) |
|---|---|---|
| AND/OR/XOR | `pg_aox` | AND 0, OR 1, XOR 2 (code 3 acts as AND) |
| NAND/NOR/XNOR/AND | `pg_nnxa` | NAND 0, NOR 1, XNOR 2, AND 3 |

Both are plain combinational multiplexers of the candidate functions. They
are synthesizable, but they are not models of the analog cells. A real chip
would need drivers that turn a mode into the right control voltage. Those
drivers are not part of this RTL.

## The 2-bit building block (`bb_fa2`)

Names: `a = {a1,a0}`, `b = {b1,b0}`, carry in `cin`, sum `{S1,S0}`, carry
out `cout`. G0..G4 are the polymorphic gates. All other gates are fixed.

```
bit 0:  p0 = G0(a0, b0)                 S0 = G2(p0, cin)
        n1 = NAND(p0, cin)  n2 = NAND(a0, b0)
        c1 = G1(n1, n2)                 -- carry into bit 1
bit 1:  p1 = a1 XOR b1                  S1 = G4(p1, c1)
        n3 = NAND(p1, c1)   n4 = NAND(a1, b1)
        cout = G3(n3, n4)
```

G0, G2 and G4 are AND/OR/XOR gates. G1 and G3 are NAND/NOR/XNOR/AND gates.
In bit 1, the gate in G0's position is a fixed XOR, not a polymorphic gate.

| configuration | G0 | G1 | G2 | G3 | G4 | use |
|---|---|---|---|---|---|---|
| `CFG_STD` | XOR | NAND | XOR | NAND | XOR | normal adder |
| `CFG_T1` | XOR | AND | AND | NOR | AND | test 1 |
| `CFG_T2` | XOR | XNOR | OR | AND | AND | test 2 |
| `CFG_T3` | OR | NOR | OR | AND | OR | test 3 |

In `CFG_STD`, `c1 = NAND(NAND(p0,cin), NAND(a0,b0)) = p0·cin + a0·b0`. This
is the ordinary propagate/generate carry, so `{cout,S1,S0} = a + b + cin`.
The source does not name the fixed gates (four NANDs and one XOR). They were
taken as the only types that make `CFG_STD` an adder.

## Test vectors and the one-flip-flop generator (`tpg`)

The two test vectors are numbered 4 and 27 out of the 32 possible inputs.
Here a vector number is read as the 5-bit word `{a1, a0, b1, b0, cin}`, MSB
first:

| vector | word | a | b | cin |
|---|---|---|---|---|
| V4 | 00100 | 00 | 10 | 0 |
| V27 | 11011 | 11 | 01 | 1 |

The two words are complements, so a single flip-flop `q` generates both:
the vector is `{q, q, ~q, q, q}`. The control unit clears `q` before a test
and toggles it on every test clock.

The source does not give the bit order behind the numbers. This order was
chosen because it gives the best fault coverage of any order (see "Fault
coverage"). For example, the order a0, b0, cin, a1, b1 would leave S1 at 0
in all six test steps, so a stuck-at-0 on S1 would never be seen.

## Reference ROM (`ref_rom`)

The ROM holds six 3-bit words `{S1, S0, cout}`, 18 bits in all. Each word is
the fault-free response of a block for one (configuration, vector) pair.
The contents were worked out from the netlist above.

| | V4 | V27 |
|---|---|---|
| test 1 | 100 | 000 |
| test 2 | 100 | 011 |
| test 3 | 101 | 110 |

The ROM is addressed by the configuration number (1..3) from the control
unit and by the vector actually applied, which is the generator's flip-flop.
If the generator falls out of step, the comparators therefore report errors.

## Self-test sequence (`bcu`) and timing

The control unit has three states: idle (normal mode), test and done.

- Start: `test_start` is sampled while idle. The test begins on the next
  clock edge.
- Test: six clocks in this order: test 1/V4, test 1/V27, test 2/V4,
  test 2/V27, test 3/V4, test 3/V27. During these clocks the control unit:
  - sets every input multiplexer to the test vector;
  - drives every block's gates with the current configuration;
  - toggles the generator;
  - enables the comparators.

  Each comparator XORs its block's three outputs with the ROM word. The
  OR of those XORs is collected at the end of every clock into a sticky
  per-block fail flag.
- Done: `test_busy` is high for exactly six clocks, for any N. Then
  `test_done` pulses for one clock. From that pulse until the next start,
  `test_pass` and `fail_map` hold the result; bit *i* of `fail_map` covers
  sum bits 2*i*+1:2*i*.
- Restarts: a start that arrives during a test is ignored.
- Outside a test: the gates are held in `CFG_STD`. Assertions in `bcu` and
  `bist_adder` check this, check the step range, and check that the
  generator matches the control unit.

While `test_busy` is high, `sum`/`cout` show the blocks' test responses,
not a sum. In normal mode the adder is purely combinational from `a`, `b`
and `cin` to `sum` and `cout`.

## The N-bit adder (`bist_adder`)

```
bist_adder #(N_BITS = 16)
  clk, rst_n (async, active low)
  a[N-1:0], b[N-1:0], cin        -> sum[N-1:0], cout
  test_start                     -> test_busy, test_done, test_pass, fail_map[N/2-1:0]
```

There are N/2 blocks. Each block *i* has its own `mux_block` and
`comparator`. In normal mode, block *i*'s carry in is block *i-1*'s carry
out, or `cin` for block 0: an ordinary ripple-carry chain of 2-bit blocks.
In test mode, every block's inputs come from the shared generator, so all
blocks are tested in parallel. `N_BITS` must be even and defaults to 16,
the largest size the source tabulates.

| N_BITS | blocks = muxes = comparators | generator FFs | ROM bits | test clocks |
|---|---|---|---|---|
| 2 | 1 | 1 | 18 | 6 |
| 4 | 2 | 1 | 18 | 6 |
| 8 | 4 | 1 | 18 | 6 |
| 16 | 8 | 1 | 18 | 6 |

All four sizes are simulated.

## Fault coverage

The source claims that the two vectors in the three test configurations
find every stuck-at fault of the block. `tb_fault_coverage` measures this
on the netlist above. It builds a 31-block system from the real `bcu`,
`tpg`, `ref_rom`, `mux_block` and `comparator`. One block is fault free.
Each of the other 30 carries one stuck-at-0 or stuck-at-1 fault on one of
the block's 15 nets: a0, b0, cin, a1, b1, p0, n1, n2, c1, p1, n3, n4, S0,
S1, cout. A single six-clock test then runs on all blocks at once.

**Result: 28 of 30 faults are detected.** Two are missed:

- `p1` (a1 XOR b1) stuck-at-1
- `n4` (NAND(a1,b1)) stuck-at-1

Both vectors have a1 ≠ b1, so p1 is always 1 and n4 is always 1. No other
bit order of the vector numbers does better on this netlist: every order
misses at least these two faults. Faults on fanout branches, as opposed to
whole nets, were not modelled. Treat the self-test as strong but not
complete.

## Choices made in this RTL

- Each gate mode is a digital code, numbered in the order the gate's modes
  are usually listed.
- The fixed gates are NAND×4 and XOR, inferred from the adder requirement.
- The vector bit order is `{a1,a0,b1,b0,cin}`.
- The ROM organisation and contents are 6×3 bits, computed from the
  netlist.
- The test steps run in configuration order 1, 2, 3, with V4 before V27 in
  each configuration.
- The start/done handshake, the sticky `fail_map` and `test_pass`, and the
  comparators' enable and OR-reduction are additions of this RTL.
- Reset is asynchronous and active low. It puts the adder in normal mode
  with `test_pass = 0`.
- During a test, the adder's outputs are the test responses. Normal
  operands are ignored.

## Files

| file | contents |
|---|---|
| `rtl/pg_pkg.sv` | mode enums, configuration struct and constants, vector constants |
| `rtl/pg_aox.sv`, `rtl/pg_nnxa.sv` | polymorphic gates |
| `rtl/bb_fa2.sv` | 2-bit building block |
| `rtl/tpg.sv` | one-flip-flop test pattern generator |
| `rtl/ref_rom.sv` | 18-bit reference ROM |
| `rtl/mux_block.sv` | per-block input multiplexer |
| `rtl/comparator.sv` | per-block XOR comparator |
| `rtl/bcu.sv` | BIST control unit |
| `rtl/bist_adder.sv` | top level |
| `tb/tb_ref_pkg.sv` | truth-table reference model of the gates and the block, with fault injection |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/bist_adder_run.sv`, `tb/tb_bist_adder.sv` | end-to-end test at 2, 4, 8 and 16 bits, with counts of every mechanism |
| `tb/tb_bist_adder_full.sv` | end-to-end test at the default size |
| `tb/fa2_fault_model.sv`, `tb/tb_fault_coverage.sv` | stuck-at fault coverage of the self-test |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_bist_adder \
    -y rtl -y tb rtl/pg_pkg.sv tb/tb_ref_pkg.sv tb/tb_bist_adder.sv
./obj_dir/Vtb_bist_adder
```

Replace `tb_bist_adder` with any other testbench name. The packages are
listed first, and `-y` finds the rest. To lint the RTL:

```
verilator --lint-only -Wall -y rtl rtl/pg_pkg.sv rtl/bist_adder.sv
```

Lint leaves a few warnings:

- unused package constants;
- `rst_n` is used both as an asynchronous reset and in assertions'
  `disable iff`;
- the comparators' `diff` outputs are not connected in the top. `diff` is
  for debug only; the control unit uses `err`.
