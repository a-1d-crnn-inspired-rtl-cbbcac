# Reconfigurable 1D-CRNN keyword-recognition accelerator

This is a small always-on accelerator that turns raw microphone samples into a
keyword decision. It has no MFCC front end. A one-dimensional convolutional
recurrent network (1D-CRNN) reads the audio directly: a few 1-D convolution
layers learn the feature extraction, one LSTM layer models time, and a fully
connected (FC) layer scores the keywords.

The main idea is that convolution, LSTM and FC layers all run on the same
20 multiply-accumulate units. These are four rows of five processing elements
(PEs). A 9-multiplexer adder network in each row switches it between two
settings:

- an adder tree for convolution windows;
- five independent accumulators for the LSTM gates and FC neurons.

The multipliers are 8x8 Booth multipliers whose precision can be lowered at run
time, layer by layer, to save power.

The RTL is in `rtl/` and the self-checking testbenches are in `tb/`. The top
module is `kws_top`.

## Block diagram and dataflow

```
 samples ──► preemph_framing ──► Buffer1 ◄──┐                      ┌──► score / cls
                                   │  ▲     │                      │
 host ──► config_bus ──► 4 x weight_sram    ├── controller ──► pe_array ──► nonlinear
              │            (40b x 1942)     │  (layer program)   (4 x cfg_mac)   │
              └─ layer program              │                                    │
                                   Buffer2 ◄┘  Conv Output Buffer ◄──────────────┘
```

A frame is processed like this:

1. `preemph_framing` high-pass filters each sample and scales it to 8 bits. It
   writes one 800-sample frame into Buffer1, then holds off the input
   (`s_ready = 0`).
2. The `controller` runs the layer program stored in `config_bus`:
   - Convolution and pooling layers go back and forth between Buffer1 and
     Buffer2. The last of them writes the features to the Conv Output Buffer.
   - The LSTM reads x_t from the Conv Output Buffer. It reads h_{t-1} and
     c_{t-1} from one buffer and writes h_t and c_t to the other.
   - The FC layer reads the last h.
3. Each FC output appears on `score` with `score_valid`. The index of the
   largest output appears on `cls` with `cls_valid`, and `done` pulses. The
   next frame is then accepted.

Memories:

| Memory | Size | Use |
|---|---|---|
| `weight_sram` x4 | 40 bits x 1942 | five 8-bit weights per word, one SRAM per PE row |
| Buffer1, Buffer2 (`data_buffer`) | 32 bits x 800 | input frame, layer ping-pong, LSTM state |
| Conv Output Buffer (`conv_out_buffer`) | 8 bits x 1680 | convolution features = LSTM inputs |

## CFG_MAC row (`cfg_mac`) and PE array (`pe_array`)

A row has the following parts:

- five D (data) registers;
- five W (weight) registers, loaded from one 40-bit SRAM word;
- five approximate multipliers;
- five adders with result registers 0..4 (register 4 is D_O);
- nine 2:1 multiplexers between the adders.

Mux 2k feeds result register k back into adder k. Mux 2k-1 feeds adder k-1
into adder k. When adder 0 is not accumulating, it takes the LAST_DIN input.

| Setting | Mux pattern (left to right) | Behaviour |
|---|---|---|
| CNN | 0,1,0,1,0,1,0,1,0 | one adder tree: D_O <= LAST_DIN + sum of 5 products; the D registers shift (a sliding window) |
| LSTM/FC | 1,0,1,0,1,0,1,0,1 | five accumulators: reg k += product k; the D registers all load the same input |

In the PE array the four rows are the LSTM gates f, i, g and o. The five
columns are five LSTM cells, so 20 gate pre-activations are updated per cycle.
SEL picks one column from every row (PE_f, PE_i, PE_g, PE_o) for the
Non-linear unit.

In CNN mode there are two kernel sizes:

- **1x5 kernels:** the four rows compute four output channels. LAST_DIN is the
  row's own D_O, so the sum carries over the input channels.
- **1x10 kernels:** rows 0-1 and rows 2-3 work as pairs. The first row's D
  chain continues into the second row, and the first row's adder-tree output
  becomes the second row's LAST_DIN. The result is two 10-tap output channels.

## Approximate multiplier (`approx_mult`)

This is an 8x8 signed radix-4 Booth multiplier. The weight is Booth coded into
four digits from -2 to +2; the data is the multiplicand. It gives four partial
products, which are sign-extended and summed to a 16-bit result. Two run-time
settings reduce the precision:

- **HBL = n:** the first n partial-product rows are merged with a bitwise OR
  instead of being added, so no horizontal carries are formed.
- **VBL = m:** the m lowest result columns are formed by AND-ing the operand
  bits. No carry leaves those columns.

HBL = VBL = 0 gives the exact product. Each layer descriptor carries its own
(HBL, VBL). The reference network uses (2, 5) on the two heaviest layers (the
second 1x10 convolution and the LSTM) and exact products elsewhere.

## Non-linear unit (`nonlinear`)

This unit is built from comparators and a small multiply-add. It registers its
result one cycle after the request. Its operations are:

| Operation | What it computes |
|---|---|
| CONV | `y = ReLU(sat8(acc >>> shift))` |
| MAX pool | running maximum over a window |
| AVG pool | `sat8(sum * recip >>> 8)`, where `recip = 256 / window` |
| LSTM | described below |
| FC | `score = sat16(acc >>> shift)`, plus a running arg-max; ties go to the lowest index |

The LSTM operation uses 6 fractional bits, so 64 means 1.0:

- Each gate first becomes `z = sat16(acc >>> shift)`.
- f, i, o = hard sigmoid = `clamp(z/4 + 32, 0, 64)`.
- g = hard tanh = `clamp(z, -64, 64)`.
- `c_t = sat16((f*c_{t-1} + i*g) >>> 6)`.
- `h_t = sat8(o * clamp(c_t, -64, 64) >>> 6)`.

## Controller and layer program (`controller`, `kws_pkg`)

The program has up to 16 entries of 128 bits each (`kws_pkg::layer_t`). The
fields are:

- `op`: END, CONV, MAXPOOL, AVGPOOL, LSTM or FC;
- `k10`, `relu`, `stride`;
- source and destination memory;
- `cin` and `cout`;
- input and output length (for the LSTM, the input length is the number of
  time steps);
- byte base addresses of the source and destination;
- first weight word `wbase`;
- requantisation `shift`;
- `hbl` and `vbl`;
- pooling window `win` and `recip`.

Each layer is a set of nested counters, and they issue one micro-operation per
cycle into a 4-stage pipeline:

1. issue the memory and SRAM reads;
2. load D and W;
3. accumulate in the PE array, or send to the Non-linear unit;
4. write the result.

The pipeline drains between layers, which costs 4 cycles.

Cycle counts:

| Layer | Cycles |
|---|---|
| CONV | `(cout/rows_per_pass) * lout * (cin*(K+1) + rows_per_pass)` |
| POOL | `cin * lout * win` |
| LSTM | `T * (H/5) * (cin + H + 5)` |
| FC | `cin + cout` |
| Every layer | 5 extra cycles (descriptor fetch and drain) |
| END | 1 cycle to fetch it |

`rows_per_pass` is 4 for 1x5 kernels and 2 for 1x10 kernels. The LSTM needs a
number of units that is a multiple of 5, and `cin + units >= 8`.

### Memory layouts

- **Tensors:** one signed byte per value, channel-major. Channel c at position
  p is at byte `base + c*len + p`.
- **LSTM state:** one 32-bit word per cell, `{c[15:0], 8'h00, h[7:0]}`. At
  time step t, state is read from one buffer and written to the other. Step 0
  writes to `dst` and starts from h = c = 0.
- **CONV weights:** the word at `wbase + pass*cin + c` holds the following.

  | Kernel | Contents |
  |---|---|
  | 1x5 | lane k of SRAM r is tap k of output channel `4*pass + r` |
  | 1x10 | SRAM 2q holds taps 0-4 and SRAM 2q+1 holds taps 5-9 of output channel `2*pass + q` |

- **LSTM weights:** the word at `wbase + g*(cin+H) + j` holds, in lane k of
  SRAM r, the weight of input j for gate r of cell `5g + k`. Inputs are x then
  h.
- **FC weights:** the word at `wbase + j` holds, in lane k of SRAM 0, the
  weight of input j for output k. There are at most 5 outputs.
- Biases are not used.

## Configure bus (`config_bus`)

This is a write-only, memory-mapped port.

| `cfg_addr` | Target |
|---|---|
| `15:13 = 000` | weight SRAM `[12:11]`, word `[10:0]`, data `cfg_wdata[39:0]` |
| `15:14 = 01` | program entry `[5:2]`, 32-bit part `[1:0]` (0 = least significant), data `cfg_wdata[31:0]` |

Writes are ignored while `busy` is high.

## Pre-emphasis and framing (`preemph_framing`)

The filter is `y[n] = x[n] - x[n-1] + x[n-1]/32`, a coefficient of 31/32. The
result is shifted right by `qshift` and saturated to 8 bits. Frames are 800
samples long and do not overlap. The input uses a 16-bit valid/ready
handshake.

## Reference workload and limits

The full-size testbench (`tb/kws_top_full_tb.sv`) runs the 5-keyword network
on the default-sized top:

1. Conv 1x5 with 8 maps, stride 2
2. max pool 5, stride 2
3. Conv 1x10 with 16 maps, stride 2
4. Conv 1x5 with 32 maps
5. Conv 1x10 with 32 maps, stride 2, approximate
6. Conv 1x5 with 48 maps, stride 2
7. average pool 2
8. LSTM with 40 units over 9 steps, approximate
9. FC with 5 outputs

It compares every memory, score and the cycle count with a bit-exact model.

Limits and departures from the original design:

- **LSTM size.** The intended network has a 50-unit LSTM. With 8-bit weights
  it needs 41,650 weight bytes, but the four SRAMs hold 38,840 bytes. So the
  reference run uses 40 units, which needs 1834 of the 1942 words per SRAM.
- **Speed.** The convolution schedule reloads the 5- or 10-tap window for
  every output position and does not slide it. One frame takes 440,083
  cycles, which is 1.76 s at 250 kHz. The original targets 16 ms per decision;
  this implementation is not real-time at that clock. Even a perfect 20-MAC
  schedule would need about 53k cycles for this network and frame.
- **Design choices that were not given.** These are the frame length of 800,
  the hard sigmoid and tanh, the fixed-point formats, arg-max in place of
  soft-max, the program format, and non-overlapping frames.
- **Outside the design.** The microphone and its I2S interface are not
  included.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and finishes. Each one
also has a watchdog. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
  rtl/kws_pkg.sv tb/kws_ref_pkg.sv tb/kws_model_pkg.sv \
  $(ls rtl/*.sv | grep -v kws_pkg) \
  tb/kws_top_full_tb.sv --top-module kws_top_full_tb
./obj_dir/Vkws_top_full_tb
```

This prints the cycle count, the class, the five scores, and how often each
mechanism occurred. For example, the default network gives:

| Mechanism | Count |
|---|---|
| 1x5 adder-tree cycles | 19,612 |
| 1x10 adder-tree cycles | 27,008 |
| LSTM accumulate cycles | 6,336 |
| PE cycles with approximate products | 27,328 |
| LSTM cell updates | 360 |

To build a block testbench, replace the last file and the top module, for
example with `tb/cfg_mac_tb.sv --top-module cfg_mac_tb`. The packages must
come first. The testbenches themselves produce some width warnings, so
`-Wno-fatal` is needed on the command line; the RTL does not rely on it.
`kws_top_tb` runs two short frames (64 samples) through a reduced
network. `kws_top_approx_tb` runs the full-size network four times, once
for each of four (HBL, VBL) settings of Conv3, Conv4, Conv5 and the LSTM:

| Case | Conv3 | Conv4 | Conv5 | LSTM |
|---|---|---|---|---|
| 1 | (0,0) | (2,5) | (0,0) | (2,5) |
| 2 | (2,8) | (2,6) | (2,8) | (2,6) |
| 3 | (3,6) | (2,5) | (3,6) | (2,5) |
| 4 | (3,8) | (3,6) | (3,8) | (3,6) |

Between runs it rewrites only the changed descriptors. Its weights are
random and small, so the stronger settings reduce every score to 0. The test
checks bit-exactness, not recognition accuracy.
