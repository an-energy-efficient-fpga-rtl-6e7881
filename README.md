# A daisy-chained FP16 convolution accelerator

This RTL computes the convolution layers of a CNN (sized for ResNet-152) on an
FPGA that shares memory with a host CPU. Its main idea is that **each processing
element (PE) owns one filter**. All PEs see the same input feature map, so
PE *i* produces output feature map *i*. No PE stores the input map. The
feature map flows past all PEs, one vector at a time, down a linear chain. The
filters and the results travel the same chain. Pooling, shortcut additions,
activations and the fully-connected layer stay on the host. So does merging the
outputs of several calls.

The default configuration has 32 PEs. Each PE works on vectors of 8
half-precision (FP16) values per cycle. Data arrives from the host in FP32, is
narrowed to FP16 once on the way in, and is widened back to FP32 on the way
out.

## What one call computes

The host describes a layer in a 10-byte record, `cnn_pkg::cu_cfg_t`:

| field | bits | meaning |
|---|---|---|
| `w`, `h` | 16 each | input map width and height |
| `c` | 16 | input channels |
| `n` | 16 | filters in this call, 1..`NUM_PE` |
| `size` | 8 | filters are `size` x `size` x `c` |
| `stride` | 8 | convolution stride |

The border is zero padding of `pad = size/2`. The output size is
`(in + 2*pad - size)/stride + 1` on each axis. Neither value is stored; every
kernel derives them.

The host passes three word addresses into the shared memory:

| address | data | layout |
|---|---|---|
| `in_base` | FP32 input map | `[c][y][x]` |
| `w_base` | FP32 filters of this call | `[f][c][ky][kx]` |
| `out_base` | FP32 output maps | `[f][oy][ox]` |

A one-cycle `start` begins the call. `done` pulses after the last output word
is written. The control unit refuses a record the chain cannot run: no filters,
more filters than PEs, a zero field, or a filter longer than a PE's weight
store. It then pulses `err` and stays idle.

A layer with more filters than PEs takes several calls. For call *k*, the host
points `w_base` at filter `32k` and `out_base` at output map `32k`.

## Dataflow

```
          +--------------+  cfg (valid/ready x4)
 host --> | control unit |-----------+-------------+--------------+
          +--------------+           |             |              |
                                     v             v              v
 memory --> input fetcher        weight fetcher   ctrl     output writer --> memory
            (stream buffer,      (FP32->FP16,      |              ^
             FP32->FP16)          zero channels)   |              |
                 | x                   | w         v              | r
                 v                     v                          |
               [PE0] --x,w,ctrl--> [PE1] --> ... --> [PE31] ------+
                 \____ r (results) ___/__________________/
```

Every arrow is a blocking FIFO channel (`chan_fifo`) with a valid/ready
handshake. A producer stalls while the channel is full, and a consumer while
it is empty. The channels come in four kinds:

- **Control.** The record goes into PE0. Each PE keeps a copy and passes it
  on.
- **Filters.** The weight fetcher sends all `n` filters into PE0. PE *i* keeps
  the first filter that reaches it and forwards the rest. The last PE forwards
  nothing.
- **Input.** Each PE reads an input vector, writes it unchanged to the next
  PE's channel and uses it, all in the same cycle. It takes a vector only when
  the next channel has room, so the slowest PE sets the pace of the whole
  chain.
- **Results.** For every output pixel, PE *i* first forwards the *i* results
  of the PEs before it, then sends its own result. The output writer
  therefore receives, per pixel, the results of filters 0, 1, ..., n-1 in
  that order.

## Vectors run along channels

A vector holds `VEC` consecutive **channels** at one position of the map. It
does not hold `VEC` neighbouring pixels of one channel. The target network has
1x1 and 3x3 filters, and hundreds of channels. Packing channels keeps all
lanes busy however small the filter is.

For each output pixel `(oy, ox)`, the stream buffer walks the loops below.
The first is outermost:

1. `oy`, `ox` (one output pixel)
2. `ky`, `kx` (one filter tap)
3. channel group `g` (one vector)
4. lane `l`

Lane `l` of group `g` stands for channel `g*VEC + l`. That channel is read at
row `oy*stride + ky - pad` and column `ox*stride + kx - pad`. A lane is zero
in two cases:

- The channel number is at or above `c`. When `c` is not a multiple of `VEC`
  these lanes form an all-zero padding channel. The first ResNet layer has 3
  channels, so it gets one vector of 3 real lanes and 5 zero lanes per tap.
- The tap falls outside the map, on the zero border.

Zero lanes cost no memory read. Overlapping windows mean the same input
element is read and sent again for every window that uses it. This trades
memory bandwidth for not storing the map.

The weight fetcher walks the same tap and channel-group order for each
filter, and pads the missing channels with zeros too. As a result, weight
vector *k* of a filter always matches input vector *k* of a window.

## Inside a PE

A PE holds these parts:

- A weight store of `WDEPTH` vectors. The default of 576 holds a 3x3x512
  filter, the largest in ResNet-152.
- `VEC` lanes, each with one FP16 multiplier and one FP16 accumulator adder.
- A pairwise adder tree of `VEC-1` adders.

For each input vector, lane `l` computes `acc[l] = acc[l] + x[l]*w[k][l]`. The
product is rounded to FP16 before the add. On the last vector of a window,
the tree reduces the lanes to one FP16 value:
`((l0+l1)+(l2+l3))+((l4+l5)+(l6+l7))`. The result goes into a two-entry
result FIFO and the accumulators are cleared.

All of this is combinational within one cycle, so a PE takes one input vector
per cycle. The order of the floating-point additions is fixed, so results are
bit-exact and reproducible. The testbenches rely on that.

A PE whose number is not below `n` holds no filter in that call. It only
forwards inputs and results.

## Throughput

| stage | rate |
|---|---|
| PE | 1 input vector per cycle |
| fetchers | 1 lane per cycle, so 1 vector per `VEC` cycles |
| output writer | 1 result per cycle |

The fetchers read one FP32 word per request. The input fetcher is therefore
the bottleneck. A call costs roughly `VEC` cycles per input vector, where the
vector count is `out_h * out_w * size*size*ceil(c/VEC)`. Loading the filters
adds `n * size*size*ceil(c/VEC) * VEC` cycles at the start. The PEs cannot
start streaming until their filters have arrived, so this load does not
overlap the input stream. On the full-size test (7x7x512 input, 32 filters of
3x3x512) one call takes 438,368 cycles. About 147k of them load the weights and 226k
stream the input at one vector per 8 cycles. The rest are stalls injected by
the test's memory model.

## Floating point

All arithmetic is IEEE-754 binary16 with these rules:

- rounding to nearest, ties to even
- full subnormal support
- overflow to infinity
- NaN results are the quiet NaN `0x7E00`

Each unit first forms its result exactly as a wide fixed-point magnitude. It
then rounds once with `cnn_pkg::fp16_round()`, so all units round the same
way:

- The adder aligns both operands to a 2^-24 grid in 42 bits.
- The multiplier forms an 82-bit product on a 2^-48 grid.

This is simple and exact, but not small. A production version would use a
conventional mantissa-and-exponent datapath with guard and sticky bits, and
would pipeline the lane adders.

`fp32_to_fp16` rounds to nearest-even. `fp16_to_fp32` is exact.

## Memory interface

The accelerator has three memory ports:

- `in_req_*` / `in_rsp_*`: read port for the input map
- `w_req_*` / `w_rsp_*`: read port for the weights
- `out_wr_*`: write port

A read request is one word address with a valid/ready handshake. Responses
return in order, at any latency, and with no back-pressure. The gather unit
(`vec_gather`) never has more reads in flight than its response FIFO holds
(`RSP_DEPTH`). The write port is valid/ready.

The cache-coherent host interconnect of the original platform is not part of
this RTL. A bridge to a real bus has to keep the in-order response rule.

## Files

| file | contents |
|---|---|
| `rtl/cnn_pkg.sv` | `cu_cfg_t`, FP16 rounding and helper functions, output-size arithmetic |
| `rtl/cnn_accel.sv` | top level: control unit, fetchers, PE chain, channels, output writer |
| `rtl/control_unit.sv` | checks and distributes the layer record, start/done/err |
| `rtl/input_fetcher.sv` | stream buffer + gather of the input map |
| `rtl/stream_buffer.sv` | lane-descriptor generator for the input map |
| `rtl/weight_fetcher.sv` | filter reader with zero-channel padding |
| `rtl/vec_gather.sv` | pipelined reads, FP32->FP16, packing into vectors |
| `rtl/processing_element.sv` | one PE |
| `rtl/output_writer.sv` | FP16->FP32 and map-major write addresses |
| `rtl/chan_fifo.sv` | blocking channel FIFO |
| `rtl/fp16_add.sv`, `rtl/fp16_mul.sv` | binary16 adder and multiplier |
| `rtl/fp32_to_fp16.sv`, `rtl/fp16_to_fp32.sv` | format converters |

Parameters of `cnn_accel`:

| parameter | default | meaning |
|---|---|---|
| `NUM_PE` | 32 | number of PEs, and the most filters per call |
| `VEC` | 8 | FP16 lanes per vector; the adder tree assumes a power of two |
| `WDEPTH` | 576 | weight vectors per PE |
| `RSP_DEPTH` | 8 | reads in flight per fetcher |
| `CH_DEPTH` | 2 | depth of the input, weight and result channels |

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. Shared testbench code:

- `tb/tb_ref_pkg.sv` holds the reference models. They decode FP16 to `real`,
  compute in double precision and round back by scaling with powers of two.
  They share no code with the RTL.
- `tb/tb_mem_rd.sv` models one read port of the host memory, with random
  stalls and latency.

The end-to-end tests:

- `tb_cnn_accel` uses 4 PEs and 4 lanes on four small layers. Together they
  cover 3x3, 1x1 and 7x7 filters, stride 1 and 2, padding channels, a layer
  split over two calls and idle PEs. It compares every output word with a
  reference convolution in the same FP16 order. It also counts that each
  mechanism happened at least once: refused call, split layer, idle PEs,
  padding channels, zero border, stride 2, filter forwarding, a full input
  channel, memory stalls and output back-pressure.
- `tb_cnn_accel_full` uses the default parameters on one 7x7x512 layer with
  32 filters of 3x3x512. This fills every PE's weight store. It takes about
  3 minutes to build and 3 minutes to run.

To run one, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/cnn_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/tb_mem_rd.sv tb/tb_cnn_accel.sv \
  --top-module tb_cnn_accel -o sim
./obj_dir/sim
```

The unit testbenches work the same way with their own module; the FP units
need only `cnn_pkg`, `tb_ref_pkg` and the unit itself.

## Where this RTL departs from, or goes beyond, its source description

The source is an OpenCL design compiled by a high-level tool, with kernels
joined by channels. This RTL keeps its block structure and dataflow. Whatever
that description leaves open is decided here:

- **Arithmetic.** It computes in FP16 throughout, as the 8-lane version of the
  original does. The 4-lane versions of the original computed in FP32; here
  they differ only by `VEC=4`, and still use FP16.
- **Rounding and order.** The rounding mode, the accumulation order and the
  reduction tree are this design's choices. Results match a reference using
  the same order bit for bit. They will differ in the last bits from an FP32
  or differently ordered computation.
- **Control record.** Its fields and their 16-bit width follow the original's
  10-byte record. The split of the last two bytes into `size` and `stride` is
  assumed.
- **Zero border.** It is generated as zero lanes. The original pads the input
  matrix by an unstated amount; `size/2` is assumed.
- **Weight store.** It is sized for a 3x3x512 filter, which the target network
  needs. The original text quotes a smaller worst-case filter size, which
  would not hold the largest ResNet-152 filter in FP16.
- **Output order.** The output writer reorders results by address arithmetic
  and needs no buffer. PEs with no filter send nothing, so there are no extra
  results to drop.
- **Memory.** The memory ports, their width (one word per request), channel
  depths, reset (asynchronous, active low) and the start/done/err handshake
  are this design's own.
- **Timing closure.** The datapath is single-cycle and combinational. It is
  functionally complete but has not been timing-closed for an FPGA clock.
- **Not implemented.** The host software, the platform's memory interconnect,
  and the layers that run on the CPU.
