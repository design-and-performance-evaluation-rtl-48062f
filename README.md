# Two-channel pipelined Vedic multiply-accumulate unit

This is an 8-bit unsigned multiply-accumulate (MAC) unit that takes in operands
twice per clock period. It has two multiplier channels that work on opposite
clock edges. Channel 1 takes an operand pair on the rising edge and channel 2
takes one on the falling edge. Each period, one adder sums the two buffered
products and a second adder adds that sum to a running total:

    acc  <=  acc + a0*b0 + a1*b1        (one pair of products per clock period)

Each channel multiplies with an 8x8 "Vedic" multiplier. It is built from four
4x4 multipliers that follow the Urdhva Tiryagbhyam ("vertically and
crosswise") rule of Vedic arithmetic. Both adders in the MAC datapath are
carry-select adders. The structure follows a published parallel-pipelined
Vedic MAC ("MAC with PPVM"). Where that description is silent, this
implementation makes its own choices, listed in the last section.

## Block structure

    a0,b0 ──► vedic_mul8x8 ──► [p1 buffer, rising edge ] ─┐
                                                          ├─► csla_adder (17 b) ──► [sum buffer] ──► mac_accumulator ──► acc, ovf
    a1,b1 ──► vedic_mul8x8 ──► [p2 buffer, falling edge] ─┘                                           (csla_adder 32 b + register,
                                                                                                        fed back)

| File | Module | Role |
|---|---|---|
| `rtl/mac_pkg.sv` | package | widths (`OP_W`=8, `PROD_W`=16, `SUM_W`=17, `ACC_W_DEFAULT`=32, `CSLA_BLOCK`=4) and operand/product types |
| `rtl/vedic_mul4x4.sv` | `vedic_mul4x4` | 4x4 to 8-bit multiplier, column-wise crosswise sums |
| `rtl/vedic_mul8x8.sv` | `vedic_mul8x8` | 8x8 to 16-bit multiplier from four 4x4 blocks and three adders |
| `rtl/csla_adder.sv` | `csla_adder` | parameterised carry-select adder |
| `rtl/mac_channel.sv` | `mac_channel` | one multiplier plus its product buffer, on a chosen clock edge |
| `rtl/mac_accumulator.sv` | `mac_accumulator` | accumulator register behind a carry-select adder, with load and overflow flag |
| `rtl/mac_ppvm.sv` | `mac_ppvm` | top: two channels, pair adder, sum buffer, accumulator |

## Clock phases and pipeline timing

The two channels run on opposite clock edges. This is the least obvious part of
the design. It fixes both the input protocol and the timing budget.

Stages, with `t` the rising edge at which channel 1 samples a pair:

| Edge | Register | Takes |
|---|---|---|
| rising `t` | `p1` (channel 1 buffer) | `a0*b0` |
| falling `t+1/2` | `p2` (channel 2 buffer) | `a1*b1` |
| rising `t+1` | `sum_q` (sum buffer), `clear_q1` | `p1 + p2` from the first carry-select adder |
| rising `t+2` | `acc`, `ovf` | `acc + sum_q`, or `sum_q` alone if that pair carried `clear` |

**Input protocol.**
- Drive `a0`, `b0` and `clear` so that they are stable around the rising edge.
- Drive `a1`, `b1` so that they are stable around the falling edge that
  follows.
- In the other half of the period, each input is ignored. The testbench checks
  this by driving random values there.
- A "pair" is the channel-1 operands taken at one rising edge plus the
  channel-2 operands taken half a period later.
- A source that makes one operand pair per half period can feed the two
  channels alternately.

**Latency and rate.**
- One pair of products enters per clock period, which is two products per
  period.
- A pair first shows up in `acc` right after the second rising edge that
  follows the edge where channel 1 sampled it. That is a latency of 2 periods.
- `clear` travels down the pipeline beside its operands (`clear_q1`,
  `clear_q2`). Its pair's sum therefore replaces the total: a new accumulation
  starts with no empty cycle.

**Timing budget.** The channel-2 product is registered on the falling edge. It
then has only half a period to get through the 17-bit carry-select adder into
the sum buffer. The channel-2 multiplier has half a period from the moment its
operands can change, right after the rising edge. Channel 1 has the mirror
image: its multiplier gets the half period before the rising edge, and its
product gets a full period to reach the sum buffer. So the clock period is
limited by twice the longer of two paths:
- input to product through the 8x8 multiplier;
- product through the 17-bit adder.

A target of 6.25 ns per operation was reported for this MAC structure. That is
a property of a cell library and place-and-route; the RTL does not fix it.

## The multipliers

**`vedic_mul4x4`** adds up columns. Column `k` of the product is the sum of all
bit products `a[i]&b[j]` with `i+j = k`, plus the carry from column `k-1`.
The column keeps bit 0 of that total and passes the rest on as the carry.
Seven columns give bits 0 to 6, and the final carry is bit 7. The carry never
exceeds 3, so a 3-bit carry is enough.

**`vedic_mul8x8`** splits the operands into nibbles and forms four partial
products:
- `q0 = aL*bL`
- `q1 = aH*bL`
- `q2 = aL*bH`
- `q3 = aH*bH`

Three adders then combine them, chained from right to left:

    s1 = q2 + q0[7:4]        9 bits
    s2 = s1 + q1             9 bits
    s3 = q3 + s2[8:4]        8 bits, cannot overflow
    p  = {s3, s2[3:0], q0[3:0]}

So `q0[3:0]` is product bits 3:0, the middle adder gives bits 7:4, and the last
adder gives bits 15:8. Both multipliers are combinational and unsigned.

## The adders

`csla_adder #(WIDTH, BLOCK)` is a carry-select adder:
- It cuts the operands into `BLOCK`-bit slices. The top slice may be narrower.
- Slice 0 ripples from `cin`.
- Every higher slice is added twice, once with carry-in 0 and once with
  carry-in 1.
- The real carry from the slice below picks one of the two results.

The MAC uses it twice:
- at 17 bits, for the sum of the two channel products;
- at `ACC_W` bits, in the accumulator loop.

The three adders inside `vedic_mul8x8` are plain `+` operators. Synthesis
picks their structure.

## Accumulator and overflow

`mac_accumulator` holds `acc` and adds `din` to it every rising edge, or
loads `din` alone when `load` is high. The total wraps modulo `2**ACC_W`.
The adder's carry-out sets `ovf`, a sticky flag that shows a wrap happened
since the last load or clear. With the default 32-bit accumulator, about
33,000 consecutive full-scale pairs (255*255 on both channels) are needed
before it wraps.

## Top-level interface (`mac_ppvm`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; both edges are used |
| `rst_n` | in | 1 | asynchronous active-low reset, clears every register |
| `clear` | in | 1 | rising edge: this pair starts a new total |
| `a0`, `b0` | in | 8 | channel 1 operands, rising edge |
| `a1`, `b1` | in | 8 | channel 2 operands, following falling edge |
| `acc` | out | `ACC_W` (32) | running sum of `a0*b0 + a1*b1` |
| `ovf` | out | 1 | sticky wrap-around flag since the last `clear` |

Parameter: `ACC_W` (default 32). The operand width is fixed at 8 bits by
`mac_pkg::OP_W`, because the multiplier is built for exactly 8 bits.

`mac_ppvm` has a concurrent assertion that the 17-bit pair sum never carries
out. Verilator's lint reports that `rst_n` is used both asynchronously and
synchronously, because of that assertion's `disable iff` clause. The warning
is expected.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_vedic_mul4x4` | all 256 operand pairs |
| `tb_vedic_mul8x8` | all 65,536 operand pairs |
| `tb_csla_adder` | 17-bit, 32-bit and 8-bit (3-bit slices) instances; carry-through-every-slice corners and random operands |
| `tb_mac_channel` | one rising-edge and one falling-edge channel: the product appears after its own edge only and holds across the other edge |
| `tb_mac_accumulator` | 32-bit and 12-bit instances against a modular running sum, including load and the sticky `ovf`; both wrap |
| `tb_mac_ppvm` | end to end at default parameters; see below |

`tb_mac_ppvm` streams 36,104 pairs:
- random pairs with occasional `clear`;
- then full-scale operands until the 32-bit total wraps.

Each input carries random values during the half period in which it is not
sampled. After every rising edge the testbench compares `acc` and `ovf` with
a reference total delayed by exactly two periods. That also checks the
latency. It counts three events and fails if any never happens:
- pairs with both channels active;
- clears;
- wrap-arounds.

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/mac_pkg.sv tb/tb_mac_ppvm.sv --top-module tb_mac_ppvm -o sim
    ./obj_dir/sim

The full run takes well under a second.

## Sources and own choices

These parts follow the published structure:
- two 8x8 Vedic multiplier channels working on opposite clock phases;
- a pipeline buffer after the multipliers;
- a first carry-select adder that sums the channel products;
- a second buffer;
- a second carry-select adder closed in a loop as the accumulator;
- the 8x8 multiplier built from four 4x4 blocks and three adders, with their
  operand slices.

These are choices made here, where the description gives nothing:
- **Channel buffers.** The published figure draws the buffer after the
  multipliers as one shared block. Here each channel has its own register on
  its own edge. The per-period pair is therefore "rising-edge operands + the
  next falling-edge operands".
- **4x4 multiplier insides.** The column scheme is an interpretation of the
  vertically-and-crosswise rule; the 4x4 block is only named.
- **Adder chain order.** The chaining order inside `vedic_mul8x8` comes from
  the block diagram's layout. The middle adder is 9 bits wide, not 8.
- **Adder type.** The name "CSLA" is implemented as a carry-select adder with
  4-bit ripple slices.
- **Accumulator.** The 32-bit width, `clear`, the sticky `ovf` flag and the
  asynchronous active-low reset are all additions made here. A generic MAC
  diagram shows an 8-bit accumulator, which could not hold one 16-bit product.
- **Signedness.** Operands are unsigned.

Not built: the single-pipeline and non-pipelined MAC variants, and the
simple-adder variant. They were only baselines for comparison. Area, power and
delay results depend on a cell library, so the RTL cannot reproduce them.
