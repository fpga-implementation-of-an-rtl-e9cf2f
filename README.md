# Gray-counter / decoder test pattern generator

A built-in self-test (BIST) needs a source of test vectors on chip. The usual
source is a linear feedback shift register (LFSR). Its successive vectors are
essentially uncorrelated, so many bits toggle from one vector to the next.
This generator takes a different route. A 3-bit Gray counter selects one line
of a 3-to-8 decoder, and the resulting one-hot word is added into an 8-bit
accumulator. The accumulator's value is the test pattern. Each step adds a
single power of two, so each pattern follows from the one before by adding
one bit weight. The logic is small: a 3-bit counter, a decoder, two 8-bit
registers and an 8-bit adder.

The patterns drive a small multiplier, which stands in for the circuit under
test. Its response is compared with the expected product.

## Datapath

```
            +-------------+    +-------------+    +------------+
 clk,rst -->| gray_counter|--->| decoder_3x8 |--->| Register B |--B_out--+
            |     c1      |3   |     d1      | 8  |  reg_8bit r2|        |
            +-------------+    +-------------+    +------------+        v
                                                                    +--------+
                                                   +--------------->| adder  |
                                                   |     A_out      |  a1    |
                                                   |                +--------+
                                                   |                    | sum
                                              +------------+            |
                                              | Register A |<-----------+
                                              | reg_8bit r1|
                                              +------------+
                                                   |
                                                   +--> a_out (test pattern)
                                                   |
                                              +----------------+
                                              | multiplier_cut |--> product
                                              +----------------+
```

All registers load on the rising edge of `clk`. `rst` is synchronous and
active high. It clears the counter and both registers. Per clock:

```
B(t+1) = onehot(gray(t))
A(t+1) = A(t) + B(t)        (mod 256)
```

There are two register stages between the counter and the pattern, so the
decoder word for Gray code `g` reaches the pattern two clocks after `g`
appears.

## The pattern sequence

The Gray counter runs 000, 001, 011, 010, 110, 111, 101, 100 and repeats. The
decoder turns these into bits 0, 1, 3, 2, 6, 7, 5, 4. The first clocks after
reset are:

| clock | Gray | Register B | pattern A | A (dec) |
|------:|:----:|:----------:|:---------:|--------:|
| 0 | 000 | 00000000 | 00000000 | 0 |
| 1 | 001 | 00000001 | 00000000 | 0 |
| 2 | 011 | 00000010 | 00000001 | 1 |
| 3 | 010 | 00001000 | 00000011 | 3 |
| 4 | 110 | 00000100 | 00001011 | 11 |
| 5 | 111 | 01000000 | 00001111 | 15 |
| 6 | 101 | 10000000 | 01001111 | 79 |
| 7 | 100 | 00100000 | 11001111 | 207 |
| 8 | 000 | 00010000 | 11101111 | 239 |
| 9 | 001 | 00000001 | 11111111 | 255 |
| 10 | 011 | 00000010 | 00000000 | 0 |

Within one counter period the pattern gains bits one at a time, filling up
towards 11111111. Over a full period the eight one-hot words sum to 255, which
is -1 mod 256. So every 8 clocks the pattern ends one lower than it did 8
clocks earlier, and the adder overflows once in nearly every period. The state
(counter, B, A) repeats every 8 x 256 = 2048 clocks. Across one period the
pattern takes all 256 values. The all-zero reset state is not part of that
cycle. The generator leaves it on the first clock and never returns to it.

## Blocks

| module | what it is |
|---|---|
| `tpg_pkg` | Shared sizes: `CNT_W = 3`, `PAT_W = 8`, `CUT_OP_W = 4`. |
| `gray_counter` | Binary counter plus `b ^ (b >> 1)` conversion. Parameter `WIDTH` (3). |
| `decoder_3x8` | Combinational one-hot decoder: code `n` sets bit `n`. Parameter `IN_W` (3). |
| `reg_8bit` | D register that loads every clock, with synchronous reset to 0. Parameter `WIDTH` (8). Used twice, as Register A and Register B. |
| `adder_8bit` | Ripple-carry adder with a carry out. Parameter `WIDTH` (8). |
| `multiplier_cut` | 4x4 unsigned array multiplier: `product = pattern[7:4] * pattern[3:0]`. Parameter `OP_W` (4). |
| `tpg_top` | Wires the blocks as in the diagram. Pins: `clk`, `rst`, `a_out[7:0]`, `product[7:0]`. |

The top has 18 pins: clock, reset, 8 pattern bits and 8 response bits. This
equals the pin count of the reference FPGA build on a Zynq XC7Z020. The Gray
code, Register B and the adder carry stay internal.

## Where this RTL makes its own choices

The block structure and the sizes are fixed: a 3-bit Gray counter, a 3-to-8
decoder, two 8-bit registers, and an adder that adds both registers and
feeds Register A. The following details are this design's own choices:

- **Counter order.** The counter is a true reflected Gray counter. A plain
  binary count from 000 to 111 would also fit the description "counts from
  000 to 111 and repeats". It would change the order in which decoder lines
  are added, but not the 2048-clock period.
- **Register A's input.** Register A is loaded only from the adder. The
  original block diagram also draws decoder lines running to Register A,
  but gives them no role, so they are not wired.
- **Reset.** Reset is synchronous and active high, and clears the counter
  and both registers to zero.
- **Clock edge.** Every register uses the same rising edge. The reference
  schematic contains inverter cells whose connections are not known, so no
  inverted clock or data path is built.
- **Adder carry.** The sum wraps modulo 256. The carry out is not used.
- **Circuit under test.** The multiplier is 4x4, taking both operands from
  one 8-bit pattern. The original says only that the patterns were applied to
  "a multiplier". An 8-bit pattern in and an 8-bit product out gives the
  18-pin count above.
- **Response check.** The comparison of the multiplier's response with the
  expected value is done in the testbench. No on-chip comparator or
  signature register is built.
- **Register count.** The reference FPGA build reported 39 flip-flops and
  71 LUTs. This RTL has 19 flip-flops (3 + 8 + 8). What the other registers
  held is not known, so nothing was added to reach that count.

The LFSR and reconfigurable Johnson counter generator, which this design is
meant to replace, is not part of this RTL.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

```
verilator --binary --timing --assert -Irtl -Itb rtl/tpg_pkg.sv tb/tpg_top_tb.sv \
          --top-module tpg_top_tb -o sim
./obj_dir/sim
```

Replace `tpg_top_tb` with `gray_counter_tb`, `decoder_3x8_tb`, `reg_8bit_tb`,
`adder_8bit_tb` or `multiplier_cut_tb` to test a single block.

- The block testbenches check against hand-written tables or exhaustive
  sweeps: all 65,536 adder inputs and all 256 multiplier patterns.
- `tpg_top_tb` runs the top at its default sizes for two full 2048-clock
  periods with a reset in between, about 4,400 clocks. Every clock it checks
  the pattern, the product and the internal Gray code, Register B and carry
  against a reference model in the testbench.
- `tpg_top_tb` also counts counter wrap-arounds, adder overflows, the
  mid-run reset and full periods, and fails if any of them never happens.
- It prints how many distinct patterns appeared: all 256.

## Changing it

The widths are parameters. `gray_counter`, `decoder_3x8`, `reg_8bit` and
`adder_8bit` work at any width. `tpg_top` takes its sizes from `tpg_pkg`.
Raising `CNT_W` widens the decoder, the registers and the adder together
(`PAT_W = 2**CNT_W`), and the multiplier becomes `PAT_W/2` x `PAT_W/2`. The
top testbench assumes the 3-bit / 8-bit sizes in its Gray table and period
length.
