# Fine-grain look-ahead clock gated 32-bit pipelined multiplier

A pipelined multiplier keeps thousands of flip-flops in flight, and in any
given cycle many of them are about to be loaded with the value they already
hold: upper bytes of a zero partial product, operand bits of a held input, the
product bits of a stream of identical multiplications. Ordinary (coarse-grain)
clock gating cannot exploit this, because it can only stop the clock of a
whole block, and a block that is busy always has *some* flip-flop that changes.

This design gates the clock of **every single flip-flop**. Each flip-flop
compares its D input with its Q output; if they are equal, the next edge would
not change anything, so its private clock is held low for that cycle. The
result is a 32 x 32 unsigned array multiplier, built from 32-bit pipelined
adders, which computes exactly what an ungated one computes while switching
clock only where data actually moves. No global enable, no controller and no
software are involved: the enables are generated locally from the data.

## The self-gated flip-flop (`lacg_dff`, `clock_gate`)

```
            d ──┬──────────────────────┐
                │      ┌───────┐       │   ┌──────┐
                └─ XOR ┤ latch ├─ AND ─┼──►│>  DFF├── q
             q ────┘   │(clk=0)│   │   └──►│D     │
                       └───────┘  clk      └──────┘
```

* `change = d ^ q` says whether the coming edge would alter the flip-flop.
* `clock_gate` ANDs the global clock with that enable. In front of the AND sits
  a latch that is transparent while the clock is low and closed while it is
  high, so the enable seen by the AND is the value of `change` just before the
  rising edge.
* The flip-flop itself is a plain rising-edge D flip-flop clocked by the gated
  clock, with an asynchronous active-high reset that clears it (the reset
  needs no clock, which matters when the clock is gated off).

Why the latch: the enable of a pipeline flip-flop depends on flip-flops in the
previous stage, and those change right after the rising edge, while the clock
is still high. With a bare AND gate the gated clock of the next stage could
then rise a second time in the same cycle and capture the new value: data would
race through two stages in one cycle. Holding the enable through the high phase
makes the gated flip-flop behave exactly like an ungated one, only without the
useless edges. This is the only latch in the design and it is intentional;
synthesis reports one latch per flip-flop.

The enable for the next edge is known one phase ahead, from the value the
preceding stage is about to hand over — this is the "look-ahead" in the name.

Seen from outside, `lacg_dff` is an ordinary D flip-flop with one cycle of
latency. Its gated clock is brought out as `gclk_o` so that tests can count
how often it is actually clocked. `lacg_reg` is a row of W of them (default 8),
each with its own gate, and `lacg_delay` is a chain of such registers.

## The 32-bit pipelined adder (`lacg_pipe_adder`)

The adder is four 8-bit carry-ripple slices (`rca8`, eight `full_adder`
cells each). Slice k handles bits `[8k+7:8k]` one cycle after slice k-1, with
the carry slice k-1 produced. Between slices sits a register bank holding:

| bank after slice | operand bits still to add | carry | finished sum bits | flip-flops |
|---|---|---|---|---|
| 0 | a[31:8], b[31:8] (48) | 1 | s[7:0]  | 57 |
| 1 | a[31:16], b[31:16] (32) | 1 | s[15:0] | 49 |
| 2 | a[31:24], b[31:24] (16) | 1 | s[23:0] | 41 |

147 flip-flops in all. The last slice drives its bits straight to `s`, so
`s = a + b + cin (mod 2**32)` appears **3 rising edges** after the operands,
and a new addition can start every cycle. The carry out of the top slice is
dropped; the adder has no carry-out port.

## The multiplier array (`lacg_pipelined_multiplier`)

Partial products are plain AND gates: `pp_i = A & {32{B[i]}}`. Row i
(i = 1 … 31) is one pipelined adder computing

```
S_i = (S_{i-1} >> 1) + pp_i          with S_0 = pp_0
```

Bit 0 of `S_i` is product bit i, final as soon as row i has produced it. Since
each row takes 3 cycles, the data a later row needs must travel beside the
adder: each row has an LACG delay line of three 63-bit registers carrying

* operand A (32 bits), for the partial products of all later rows,
* operand B bits i+1 … 31, the multiplier bits not yet used,
* the finished product bits 0 … i-1.

After the last row, `Output_Q = {S_31[0], product bits 30..0}`.

| quantity | value (WIDTH = 32) |
|---|---|
| adder rows | 31 |
| latency, operands to `Output_Q` | 93 rising edges (31 rows x 3) |
| throughput | one product per cycle |
| flip-flops | 10 320 (4 557 in adders, 5 763 in forwarding) |
| output | low 32 bits of the unsigned product |

The gating pays off in exactly the places described above: with both
operands held, the forwarding registers and all adder banks stop receiving clock
pulses once the pipeline has filled; with B = 0 every partial product is zero
and whole adder rows stay quiet even while A changes.

### Clock activity

The full-size testbench sums the private clocks of all 10 320 flip-flops
every cycle. An ungated design clocks all of them every cycle; here:

| input case | flip-flops clocked per cycle |
|---|---|
| random A and B, new pair every cycle | about 4 300 (42 %) |
| A = B = 1, held | 0 once the pipeline has filled |
| A = 1, B = 0, held | 0 once the pipeline has filled |
| A = 0, B = 1, held | 0 once the pipeline has filled |
| A = B = 0, held | 0 once the pipeline has filled |

Even with fully random operands more than half of all flip-flop clock edges
are suppressed, because many pipeline bits (zero partial-product bits, operand
bits that happen to repeat, sum bits of rows with `B[i] = 0`) do not change
from one cycle to the next. This is a count of clock edges, not a power
figure; the cost of the gates themselves (one latch, one AND and one XOR per
flip-flop) is not included.

### Ports

| port | dir | width | meaning |
|---|---|---|---|
| `clock` | in | 1 | global clock; every flip-flop derives its own gated copy |
| `reset` | in | 1 | asynchronous, active high, clears every flip-flop |
| `input_A` | in | 32 | multiplicand |
| `input_B` | in | 32 | multiplier |
| `Cin` | in | 1 | carry into the first adder row (weight 2) |
| `Output_Q` | out | 32 | `(input_A * input_B + 2*Cin) mod 2**32`, 93 cycles later |

Keep `Cin` at 0 for a plain product. While `reset` is high, `Output_Q` is 0.
`Output_Q` is driven combinationally from the last adder slice; register it
outside if a registered output is needed.

## Where this RTL departs from, or adds to, the design it follows

These points are choices made here where the original description is silent
or ambiguous; an engineer reusing the RTL should know them.

* **Enable latch.** The original gating logic is a bare AND gate per
  flip-flop. The latch was added for the reason given above.
* **Flip-flop count.** The original 32-bit multiplier reports 1 957
  flip-flops, far fewer than the 10 320 here. How it aligns operands with the
  later rows while keeping one product per cycle is not described, so this
  RTL forwards the operands explicitly and keeps full-width adders. A synthesis
  tool removes the flip-flops whose outputs never reach `Output_Q` (the upper
  sum bits of late rows); about 6 200 remain.
* **The adder's banks** are reconstructed so that they add up to the 147
  flip-flops reported for the original adder; the split into operand, carry and
  sum bits is this design's.
* **`Cin`** is only named in the original interface. Here it is the carry into
  the first row, which adds `2*Cin` to the product.
* **Signedness and width of the result.** Operands are unsigned, and only the
  low 32 product bits leave the design, as the 32-bit `Output_Q` implies.
* **Reset** polarity and type were chosen here (asynchronous, active high).
* **Not built:** the falling-edge variant of the gated flip-flop (XNOR/OR
  gating), the coarse-grain comparison designs, and anything about power: the
  power savings reported for the original (up to about 13 % on an FPGA) are a
  property of an implementation, not of this RTL, and were not measured.

## Files

| file | content |
|---|---|
| `rtl/lacg_pkg.sv` | slice width (8), operand width (32), latency functions |
| `rtl/clock_gate.sv` | latch + AND clock gate |
| `rtl/lacg_dff.sv` | self-gated D flip-flop |
| `rtl/lacg_reg.sv` | W-bit register of self-gated flip-flops |
| `rtl/lacg_delay.sv` | chain of such registers |
| `rtl/full_adder.sv`, `rtl/rca8.sv` | 8-bit carry-ripple slice |
| `rtl/lacg_pipe_adder.sv` | 32-bit pipelined adder |
| `rtl/lacg_pipelined_multiplier.sv` | top: 32 x 32 pipelined multiplier |
| `tb/tb_*.sv` | one self-checking testbench per module above |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    --top-module tb_lacg_pipelined_multiplier \
    rtl/lacg_pkg.sv tb/tb_lacg_pipelined_multiplier.sv
./obj_dir/Vtb_lacg_pipelined_multiplier
```

The same command with `tb_rca8`, `tb_clock_gate`, `tb_lacg_dff`,
`tb_lacg_reg` or `tb_lacg_pipe_adder` runs the unit tests. Building the full
multiplier takes about two minutes (over ten thousand separately clocked
flip-flops); the run itself takes seconds.

What the tests check:

* `tb_rca8`: all 2^17 input combinations.
* `tb_clock_gate`: pulses pass only when the enable was high before the edge;
  enable changes during the high phase have no effect.
* `tb_lacg_dff`, `tb_lacg_reg`: storage like a plain flip-flop, and a private
  clock pulse in exactly the cycles where the bit changes.
* `tb_lacg_pipe_adder`: random sums, carries across every slice boundary,
  the constant cases A = B = 1; A = 1, B = 0; A = 0, B = 1; A = B = 0,
  exact 3-cycle latency, and no clock pulse in the first bank while the
  operands are held.
* `tb_lacg_pipelined_multiplier` (full 32-bit size): a new operand pair every
  cycle through the five input cases random A and B; A = B = 1; A = 1, B = 0;
  A = 0, B = 1; A = B = 0; plus all-ones operands, `Cin = 1` and a reset in
  mid-stream. Every product is checked exactly 93 cycles after issue, and the
  test requires that during the constant cases, once the pipeline has filled,
  no flip-flop anywhere in the array gets a clock pulse. It prints the clock
  activity of each case (table above).

## Changing it

`WIDTH` on `lacg_pipe_adder` and `lacg_pipelined_multiplier` sets the operand
width; it must be a multiple of 8 and at least 16 (latency becomes
`(WIDTH-1) * (WIDTH/8 - 1)`). Only the 32-bit size is exercised by the
testbenches. The slice width is `SLICE_W` in `lacg_pkg`; changing it changes
the number of pipeline stages per adder.

The gated flip-flop is the only place that knows about clock gating. To
compare against an ungated version, replace the body of `lacg_dff` with a
plain `always_ff @(posedge clk ...)` flip-flop; nothing else changes.
