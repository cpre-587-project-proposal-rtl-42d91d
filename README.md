# Variable-precision packed integer MAC on a logic-analyzer bus

This is a small multiply-accumulate (MAC) accelerator for a microcontroller-class
chip. A CPU that has no multiply instruction writes two 32-bit words, an
activation word and a weight word, and the MAC adds their product to a 32-bit
accumulator. The words do not have to hold one 32-bit number each. They can hold
2, 4, 8 or 16 packed unsigned integers of 16, 8, 4 or 2 bits. The MAC then
multiplies each pair of lanes and adds all the products in one operation. That
gives up to 16 multiply-adds per CPU write, which suits quantized neural-network
inference.

The whole interface is the 128-bit logic-analyzer (LA) bus between the
management CPU and the user area of the chip. No wishbone slave and no memory map
are used. The CPU sets bits in the LA output register, and the MAC sees them as
`la_data_in`.

## Precision select and lane packing

| `i_SEL` | lane width | lanes per word | result added to the accumulator |
|---|---|---|---|
| `000` | 32 | 1  | `D * W` |
| `001` | 16 | 2  | `D[31:16]*W[31:16] + D[15:0]*W[15:0]` |
| `010` | 8  | 4  | sum over `i` of `D[8i+7:8i] * W[8i+7:8i]` |
| `011` | 4  | 8  | sum over 8 nibble pairs |
| `100` | 2  | 16 | sum over 16 two-bit pairs |
| `101`–`111` | – | – | 0 (accumulator unchanged) |

A data lane is always multiplied by the weight lane at the same bit positions.
Lanes are **unsigned**. For example, at 4 bits, `9ABCDEF1 · 12345678` is
9·1 + 10·2 + 11·3 + 12·4 + 13·5 + 14·6 + 15·7 + 1·8 = 372.

All arithmetic is modulo 2^32. The 32×32 product keeps only its low 32 bits, and
the accumulator wraps on overflow. Nothing saturates and no flag is raised.
There is one useful result of this. The low 32 bits of a product are the same
for signed and unsigned operands, so in 32-bit mode two's-complement operands
give a correct signed result, provided the true sum fits in 32 bits. The Iris
example below relies on this. The packed modes are unsigned only.

The rule for undefined select codes is a choice made in this design: they
contribute 0.

## Why the enable is edge-triggered

The CPU can change an LA bit only once every many MAC clock cycles. If the
enable were a level, one "enable = 1" write would trigger hundreds of MACs. So
the enable is treated as an event. Two flip-flops hold the two most recent
samples of `i_EN`. A MAC happens in the one cycle where the newer sample is 1 and
the older sample is 0 (`mac_en_edge`). One CPU write sequence then performs
exactly one MAC, however long the enable stays high:

1. Write the data, weight and select.
2. Set the enable to 1.
3. Clear the enable back to 0.

Timing, all on rising edges of the clock:

```
edge k     : i_EN first sampled 1        -> s_en (strobe) high during cycle k..k+1
edge k+1   : accumulator <= accumulator + dot(i_DATA, i_WEIGHT, i_SEL)
```

The operands are **not** registered. They are used as they are at edge k+1, so
they must be written before the enable is raised, as the sequence above does. The
fastest repeat rate is one MAC every three cycles (enable high, low, high).

`i_RST` is synchronous and active high. It clears the accumulator and wins over a
MAC in the same cycle. During reset both enable samples load the current enable
value, so an enable held high through reset is not counted as a new edge. The
enable and reset are assumed to come from logic on the same clock. On the target
chip the LA register and the user area share the wishbone clock, so no extra
synchronizer stage is fitted. If you drive `i_EN` from an unrelated clock,
put a two-flop synchronizer in front of `mac_en_edge`.

## LA bus map (`mac_user_project`)

| signal | bits | direction (from the user area's view) |
|---|---|---|
| weight word | `la_data_in[31:0]` | in |
| data (activation) word | `la_data_in[63:32]` | in |
| precision select | `la_data_in[66:64]` | in |
| enable (0→1 = one MAC) | `la_data_in[67]` | in |
| synchronous reset | `la_data_in[68]` | in |
| unused | `la_data_in[127:69]` | in, ignored |
| accumulator | `la_data_out[127:96]` | out |
| – | `la_data_out[95:0]` | out, always 0 |

The clock is the wishbone clock, `wb_clk_i`. The port names follow the usual
user-project-wrapper convention. The rest of such a wrapper (wishbone slave, GPIO,
interrupts, LA output enables, power pins) is not used and is left out. Wrap
`mac_user_project` in your own wrapper to connect those.

## Hardware structure

```
mac_user_project          LA bit slicing, zeroes unused outputs
└── mac                   accumulator register s_acc_reg, reset, update on s_en
    ├── mac_en_edge       two enable sample flops -> one-cycle strobe s_en
    └── mac_packed_dot    5-way select of the per-precision results
        └── mac_lane_sum  x5 (LANE_W = 32, 16, 8, 4, 2): lane products, then their sum
mac_pkg                   widths, select enum qsel_e, LA bit positions
```

The datapath is deliberately simple. Each precision has its own sum-of-products
unit, written with `*` and `+` and left to synthesis to map. The select then picks
one result. A smaller design would share partial-product arrays across
precisions, as in the usual packed-SIMD multiplier. That is a valid
optimization, but this design does not do it. The datapath has no pipeline
registers, so the clock period must cover a 32×32 multiply and a 32-bit add.
After coarse synthesis the design has 34 flip-flops: 32 for the accumulator and
2 for the enable samples.

## Using it for a neural network

Here is how firmware uses the MAC for a dense layer. For each output neuron:

1. Reset the accumulator.
2. Add the bias as one 32-bit MAC (bias × 1).
3. Do one MAC per input (activation × weight).
4. Read the accumulator.
5. Apply ReLU in software.

For the Iris classifier topology (dense layers 4×10, 10×10, 10×5 and 5×3 with
ReLU), that is 205 weight MACs and 28 bias MACs per inference. The MAC stores no
weights, so the network size is limited only by CPU memory.

The values are a different matter. The accumulator keeps 32 bits, so fixed-point
formats must be scaled so that each product and each running sum fits in 32
bits. Two Q16.16 numbers multiply to a 64-bit Q32.32 product, of which this MAC
keeps only the low half. With Q16.16 data you therefore need smaller operands,
for example integer-quantized ones, or a rescaling step in software.

## Verification

Each testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_mac_packed_dot` | Hand-worked examples for every precision. All-ones operands. The undefined selects. 4000 random vectors against a shift-and-mask reference model (`tb/mac_ref_pkg.sv`). |
| `tb_mac_en_edge` | Random enable levels with random hold lengths and resets, against a cycle model. One pulse per edge. No pulse for a level held through reset. The assertion `a_single_cycle`. |
| `tb_mac` | The firmware sequence with one MAC per precision, giving totals 4, 111, 181, 553, 617 and then 0 after reset. Random runs per precision with lane operands up to 1000/1000/255/15/3. Mixed full-range runs with resets. The exact update edge (second edge after the enable) and a single update for a held enable. |
| `tb_mac_user_project` | End to end over the LA bus, at default configuration. About 3000 MACs. Counts every mechanism (each precision, held enable, reset, accumulator wrap, undefined select) and fails if one never happens. Checks that `la_data_out[95:0]` stays 0. |
| `tb_iris_dense` | The 4-10-10-5-3 ReLU network over the LA bus. Uses random signed integer weights (fixed seed; no trained model) and three Iris samples in millimetres. Checks every neuron's sum and the chosen class against plain integer arithmetic. |

## Simulating

The files are self-contained SystemVerilog-2017. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mac_pkg.sv tb/mac_ref_pkg.sv tb/tb_mac_user_project.sv \
    --top-module tb_mac_user_project -o sim
./obj_dir/sim
```

Replace the testbench file and top module to run another test. Lint a module
with `verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/mac_pkg.sv
rtl/<module>.sv`. The only warnings are for package constants that a given
module does not use.

## Design decisions and limits

These points follow the reference interface:

* the 32-bit words and 32-bit accumulator;
* the five select codes and the lane pairing;
* the LA bit map;
* the synchronous active-high reset;
* the two-flop enable edge detector;
* unsigned lanes.

These are choices made in this design:

* wrap-around on overflow;
* 0 for undefined select codes;
* reset priority over a MAC, and the reset behaviour of the enable flops;
* unregistered operands;
* no enable synchronizer;
* one sum-of-products unit per precision;
* the port names of the top.

Not included:

* the management CPU that drives the LA bus;
* the rest of the user-project wrapper;
* the standard-cell netlist and physical layout of a particular process.
