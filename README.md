# LUT-based activation function accelerator

Activation functions like the sigmoid and SiLU (x·sigmoid(x)) need an exponential,
a division and, for SiLU, a multiplication. Computed directly in hardware they
use DSP blocks, hundreds of flip-flops and many cycles. This design uses a
simpler idea: when a neural network runs on **8-bit** data, the input has only
256 possible values. So the whole function can be worked out ahead of time and
stored in a 256-entry table of 8-bit results. The input bits are then used
unchanged as the table address. Evaluation is a single memory read, with no
arithmetic, no DSPs and one clock of latency. Every result is the correctly
rounded value of the exact function, so the error is at most 1/2 LSB.

The same hardware serves any function of one variable; only the table contents
change. This RTL provides sigmoid and SiLU tables. Around the lookup unit it
adds the parallel streaming structure a network accelerator needs: several
lanes per stream and several streams side by side, with FIFOs in between.

## The number format, and why there are nine tables

An 8-bit fixed-point value can put its binary point in 9 places, from 0 to 8
fractional bits (`FRAC_BITS`). With signed data and `FRAC_BITS = F`, the code
`k` (-128..127) stands for `x = k / 2^F`. For example:

| FRAC_BITS | input range (signed) | step     |
|-----------|----------------------|----------|
| 0         | -128 .. 127          | 1        |
| 3         | -16 .. 15.875        | 0.125    |
| 4         | -8 .. 7.9375         | 0.0625   |
| 8         | -0.5 .. 0.496        | 1/256    |

One table can only sample the function over one of these ranges. There is
therefore one table per binary-point position. The position is a
**compile-time parameter**, so each instance builds exactly one 256 × 8-bit
table, the one its data format needs. With `IS_SIGNED = 0` the code is read as
unsigned (0..255) instead.

The output uses **the same format as the input**. Entry `k` of the table holds

    sigmoid:  clamp( round( sigmoid(k / 2^F) * 2^F ) )
    SiLU:     clamp( round( k * sigmoid(k / 2^F) ) )        (= SiLU(x) * 2^F)

Here `round` is to nearest, with ties towards +infinity, and `clamp` limits the
result to the code range (-128..127 signed, 0..255 unsigned). Because the output
format matches the input, the sigmoid's range (0, 1) fits badly at the extreme
positions:
- With many fractional bits, values near 1 do not fit and saturate. With
  `FRAC_BITS = 8` the largest code is 127/256, so every sigmoid value of 0.5 or
  more gives 127.
- With few fractional bits, the sigmoid collapses to a few codes. With
  `FRAC_BITS = 0` it gives only 0 or 1.

SiLU suits the shared format naturally. With 3 fractional bits (the default),
its output stays in range for every input. Small negative inputs give small
negative outputs, for example SiLU(-1) = -0.27, which rounds to -2/8.

### How the tables are computed

No data file is used. `act_pkg::lut_entry()` is a constant function that works
out each entry during elaboration, using only integer arithmetic:

1. `n = |k| · 2^(8-F)`, so that `|x| = n / 256`.
2. `e^-|x| = b^n`, where `b = e^(-1/256)` is stored as a Q2.62 constant. The
   power is computed by square-and-multiply over 16 bits of `n`, in 128-bit
   arithmetic.
3. `sigmoid(|x|) = 2^124 / (2^62 + e^-|x|)` in Q62. For negative `x` the
   symmetry `sigmoid(x) = 1 - sigmoid(|x|)` is used.
4. Scale, round and clamp as in the formulas above.

Truncation in the 62-bit fraction, compounded over the squarings, leaves the
computed sigmoid within about 2^-45 of the exact value. That is far finer than
the output step, so rounding decisions come out right. The testbenches check
the results against an independent `$exp`-based reference.

To add another function of one variable (tanh, GELU, …), add an enumerator to
`act_func_e` and a branch in `lut_entry()`. Nothing else changes.

## Datapath

```
            act_accel_top (one of STREAMS channels shown)
 in_valid/ready/data ──► stream_fifo ──► act_layer ───────────────► stream_fifo ──► out_valid/ready/data
  LANES × 8 bits         (DEPTH)         ┌ act_lut lane 0 ┐          (DEPTH)
                                         │ act_lut lane 1 │
                                         │      ...       │
                                         └ act_lut lane N ┘
```

- **`act_lut`**: one lookup unit. The table is a constant array read
  combinationally, followed by an 8-bit output register and a valid bit. It has
  a latency of 1 cycle and accepts a new value every cycle. `en = 0` freezes the
  register. Synthesis maps the table to LUT logic or distributed ROM, so it uses
  no block RAM and no DSPs.
- **`act_layer`**: `LANES` lookup units in lock step, which transform one
  vector per cycle. The stage advances when its output register is empty or is
  being read (`in_ready = !out_valid || out_ready`). A stalled result is held,
  and the input is blocked for as long as the stall lasts.
- **`stream_fifo`**: a FIFO whose entries are whole vectors, with valid/ready
  on both sides. It can be read and written in the same cycle. `in_ready` is low
  only when the FIFO is full. An empty FIFO adds one cycle of latency.
- **`act_accel_top`**: `STREAMS` independent channels, each made of an input
  FIFO, a layer and an output FIFO.

**Timing.** A beat accepted at clock edge *t* is offered at the output from
edge *t+3* (input FIFO, lookup register, output FIFO). With both ends always
ready, each stream moves one vector per cycle. The whole accelerator then
evaluates `STREAMS × LANES` values per cycle: 8 at the defaults, or 1.6·10^9
values/s at a 200 MHz clock. When the consumer stops, the output FIFO fills
first, then the layer holds its result, then the input FIFO fills, and finally
`in_ready` drops. No beat is lost or reordered.

`rst_n` is a synchronous, active-low reset. It clears the FIFO pointers and the
valid bits. FIFO storage is not reset, and an entry is only read after it has
been written.

## Parameters

| parameter    | default       | meaning |
|--------------|---------------|---------|
| `FUNC`       | `ACT_SILU` (top), `ACT_SIGMOID` (`act_lut`) | function held in the tables |
| `FRAC_BITS`  | 3             | fractional bits of input and output, 0..8 |
| `IS_SIGNED`  | 1             | two's-complement data (0: unsigned) |
| `STREAMS`    | 2             | independent channels |
| `LANES`      | 4             | values per vector (lookup units per channel) |
| `FIFO_DEPTH` | 2             | entries per stream FIFO |

`FUNC`, `FRAC_BITS` and the 256 × 8-bit table follow the accelerator as it was
specified. SiLU with 3 fractional bits is the configuration used when the unit
replaces ReLU in a CIFAR-10 ResNet.

The following are choices of this implementation, not given by the
specification:
- `STREAMS`, `LANES` and `FIFO_DEPTH` (2 is the usual default depth of an HLS
  stream);
- the valid/ready handshake and the reset;
- the rounding tie rule;
- saturation.

## Verification

Every testbench checks itself and ends with a
`TB_RESULT checks=N failures=M` line.

| testbench            | what it shows |
|----------------------|---------------|
| `tb_act_lut`         | All 256 inputs, both functions, all 9 binary-point positions (signed) plus two unsigned cases, each within 1/2 LSB of `$exp`-based reference values or correctly saturated. Also checks hand-worked values, the 1-cycle latency, hold while `en` is low, and reset. |
| `tb_stream_fifo`     | Depths 2 and 5 under random traffic, against a queue model: data order, `in_ready`/`out_valid`, full and empty behaviour, 1 beat per cycle. |
| `tb_act_layer`       | A sigmoid layer (8 fractional bits, so that saturation occurs) and an unsigned SiLU layer under random back-pressure. Checks data against the reference, latency 1, throughput of 1 vector per cycle, hold during a stall. |
| `tb_act_accel_top`   | The top at its default parameters, end to end: free flow at 1 vector per cycle per stream, 3-cycle latency, random back-pressure, a full stop that fills every FIFO, and a sweep of all input codes. It also counts layer stalls, refused inputs, both streams delivering together, and negative SiLU outputs, and fails if any of these never happened. |
| `tb_feature_map`     | One activation layer of a CIFAR-10 ResNet: a 32×32×16 feature map (16384 values) streamed through the default top. Every value is checked, and the run must take exactly 2048 + 2 cycles from the first input to the last output. The maximum error seen is 0.49 LSB. |

To run one with Verilator (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_act_accel_top \
  -y rtl -y tb +libext+.sv rtl/act_pkg.sv tb/act_ref_pkg.sv tb/tb_act_accel_top.sv
./obj_dir/Vtb_act_accel_top
```

`tb_act_lut` and `tb_stream_fifo` do not need `tb/act_ref_pkg.sv`. All of
these simulations finish in seconds.

## Scope and limits

- **Only the activation unit and its streaming wrapper are here.** The
  convolution, batch-normalization and residual-add layers of the ResNet
  accelerators it was designed for are not included. The same applies to the
  weight memories and the board-level system. The streams are plain ports, so
  the unit can be placed between such layers.
- **Functions of one 8-bit variable only.** Wider inputs would need tables of
  2^16 or 2^32 entries. That is workable only for saturating functions such as
  the sigmoid, and only after range reduction, which is not implemented.
  Softmax, which depends on many inputs, is out of reach.
- **Precision is fixed per instance.** A network whose layers use different
  formats needs one instance per format, each built with its own `FRAC_BITS`.
- **Resource figures are not reproduced.** The reference implementation was
  reported at about 10 flip-flops and 34 LUTs for one lookup unit, with no DSPs
  and no block RAM. This RTL has the same structure: one 8-bit register plus a
  valid bit, and a 256 × 8 constant table. It has not been through an FPGA
  implementation flow.
- The block-RAM variant of the table (slower to read, and it uses block RAM)
  is not provided. The table here always uses logic.

## Files

- `rtl/act_pkg.sv`: types, constants and the table generator `lut_entry()`.
- `rtl/act_lut.sv`: one lookup unit.
- `rtl/act_layer.sv`: `LANES` lookup units with a stream handshake.
- `rtl/stream_fifo.sv`: the stream FIFO.
- `rtl/act_accel_top.sv`: the parallel accelerator.
- `tb/act_ref_pkg.sv`: floating-point reference shared by the stream
  testbenches.
- `tb/tb_*.sv`: the testbenches listed above.
