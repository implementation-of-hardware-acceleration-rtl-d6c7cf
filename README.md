# Streaming quantized AOD-Net defogging core

AOD-Net removes haze from a single image by estimating one factor per pixel and colour, K(x),
and recovering the clean image as

    J(x) = K(x) * I(x) - K(x) + 1          (I, J in [0, 1])

K comes from five small convolutions. This core computes the whole network on a raster-order pixel
stream: a hazy RGB frame enters over AXI4-Stream, the defogged frame leaves over AXI4-Stream, and
no frame buffer is needed. All arithmetic is integer: 8-bit activations, 5-bit weights with zero
points, 32-bit accumulators, and a multiply-and-shift rescale after each layer. The network was
chosen for an FPGA in the Zynq-7020 class. That device's processing system, a video DMA and DDR
memory surround the core, but they are not part of this RTL.

## The network and how it maps onto a stream

| layer | kernel | input channels            | output |
|-------|--------|---------------------------|--------|
| conv1 | 1x1    | I (3)                     | c1 (3) |
| conv2 | 3x3    | c1 (3)                    | c2 (3) |
| conv3 | 5x5    | c1, c2 (6)                | c3 (3) |
| conv4 | 7x7    | c2, c3 (6)                | c4 (3) |
| conv5 | 3x3    | c1, c2, c3, c4 (12)       | K (3)  |

Each convolution is followed by a ReLU. The network has 1746 weights and 15 biases.

The concatenations are the tricky part for a streaming design. conv5 needs c1, which is 1+2+3
lines "older" than c4 at the same pixel. Here every layer carries forward, unchanged, the
channels that later layers still need, and appends its own output. Each pixel of the stream is
therefore a growing vector:

    input   : I                         (3 channels)
    conv1 ->: I c1                      (6)
    conv2 ->: I c1 c2                   (9)
    conv3 ->: I c1 c2 c3                (12)
    conv4 ->: I c1 c2 c3 c4             (15)
    conv5 ->: I c1 c2 c3 c4 K           (18)  -> recover uses I and K

A layer's line buffer delays the carried channels by exactly the amount it delays its own
output. All channels of one vector therefore belong to the same pixel, and every concatenation
is just a slice of the vector (`WLO`, `CIN` parameters of `conv_layer`). The line buffers are
wider than the convolved channels alone would require. In exchange there is no separate delay
line per skip connection.

## One convolution layer (`conv_layer`)

* **Line buffer** (`line_buffer`): K-1 previous lines, W columns. For column x it returns the
  stored column, and a write shifts that column up by one line.
* **Window buffer** (`window_buffer`): KxK registers. Each step shifts them one column left and
  takes {line-buffer column, new pixel} as the new right-hand column.
* **Scan**: a counter walks (H+R) x (W+R) positions, where R = (K-1)/2. Inside the image each
  position consumes one input pixel. Past the right or bottom edge it shifts in zeros, so the
  last R lines and columns are flushed without the next frame. At position (y, x), with y, x >= R,
  the window is centred on pixel (y-R, x-R).
* **Boundary**: pixels closer than R to an edge are not convolved. Their new channels are copies
  of the centre's first COUT convolved input channels.
* **MAC**: an interior pixel takes COUT*K clocks. Each clock handles one (output channel, kernel
  row) pair: it sums K*CIN products `(qx - Zx)*(qw - Zw)` into that channel's accumulator, which
  starts from the bias. For the 7x7 layer this is 42 multipliers, and for the 3x3, 12-input layer
  it is 36.
* **Rescale** (`requant`): `q = Zy + ((acc*m + 2^(sh-1)) >>> sh)`, clamped to [Zy, 255]. The
  clamp is the ReLU, because real zero is q = Zy.
* **Output register**: a single register with valid/ready handshake. The layer stalls while that
  register is full.

Clocks per scan position: 1 (shift); plus 1 for a boundary pixel, or COUT*K + 1 for an interior
pixel.

## Recovery and border (`recover`)

With I = qI/255, J = qJ/255 and K = (qK - Z_K) * mk / 2^sk:

    qJ = 255 + (((qI - 255) * (qK - Z_K) * mk + 2^(sk-1)) >>> sk),   clamped to [0, 255]

The layer boundaries add up to a band three pixels wide in which the convolutions are not
computed. There the original hazy pixel is sent instead (`BORDER = 3`). Pixels a few lines inside
that band use feature maps whose own boundary values were passed through, so they differ slightly
from a zero-padded floating-point network. `recover` also generates the video-stream flags:
`tuser` on the first pixel of a frame and `tlast` on the last pixel of each line.

## Throughput

The 7x7 layer sets the pace: 1 + 21 + 1 = 23 clocks per interior pixel. The other layers stall
behind it through valid/ready. At 640x480 one frame takes 7,056,734 clocks in simulation. The
7x7 layer alone would need 6,928,605; the extra 1.8 % comes from the single-register hand-over
between layers. At a 20 ns clock a frame takes 0.141 s. The HLS implementation this design is
modelled on was rated at 0.12 s (theoretical) and measured at 0.14 s.
On small test frames, where boundary pixels dominate, the hand-over costs much more (a 20x14
frame takes about 1.8 times the 7x7 layer's own time). Putting small FIFOs between the layers
would remove most of this cost.

## Configuration (AXI4-Lite, `axil_cfg`)

Writes are full 32-bit words, with no byte strobes. Word address = byte address / 4. Bits
[13:11] of the word address select the target and bits [10:0] select the register:

| target | register (word offset)                                                    |
|--------|---------------------------------------------------------------------------|
| 0 recover | 0: Z_K, 1: mk (16 bit), 2: sk (6 bit)                                 |
| 1..5 layer | 0..NW-1: weight i = ((oc*K + kr)*K + kc)*CIN + ic (5 bit)           |
|        | 1024+oc: bias (signed 32 bit, scale Sx*Sw)                                 |
|        | 1040: Zx, 1041: Zw, 1042: Zy, 1043: m (16 bit), 1044: sh (6 bit)          |

A read of word 0 returns the number of frames whose first output pixel has been delivered.
Everything must be written before the first frame. The constants come from post-training
quantization: S = (rmax - rmin)/(qmax - qmin), Z = round(qmax - rmax/S) per layer, with 5-bit
weights and m/2^sh ≈ Sx*Sw/Sy. A layer has one input zero point and one input scale. The
feature maps concatenated into one layer's input (c1..c4) must therefore be quantized with a
common scale.

## Interfaces of the top (`aod_net_core`)

| port | meaning |
|------|---------|
| `ap_clk`, `ap_rst_n` | clock, asynchronous active-low reset |
| `s_axis_*` (24-bit `tdata`, `tvalid`, `tready`, `tuser`, `tlast`) | hazy frame, channel 0 in bits [7:0] |
| `m_axis_*` (same) | defogged frame |
| `s_axil_*` | configuration, 16-bit byte address |

Frames must be exactly W x H pixels (parameters `W = 640`, `H = 480`). The input `tuser` and
`tlast` are not checked, and a short frame misaligns every following one.

## Where this departs from, or goes beyond, the source description

* The layer structure and the recovery formula are those of the published AOD-Net. The
  implementation described only names that network.
* The original core is HLS-generated with weights built in. Here the weights are written at run
  time, because trained values are not available.
* The carried-channel stream, the per-row MAC schedule, the 8-bit activation width, the rescale
  encoding, the register map and the status word are choices of this design.
* What the boundary pass-through copies, for layers fed by a concatenation, is a choice of this
  design: the first COUT convolved channels.
* Not included: the processing system, the video DMA, DDR memory, the SD card and LCD output
  that surround the core on the board, and the offline quantization software.

## Files and simulation

`rtl/`: `aod_pkg` (types, widths, register map), `line_buffer`, `window_buffer`, `requant`,
`conv_layer`, `recover`, `axil_cfg`, `aod_net_core` (top).

`tb/`: one self-checking testbench per module. `aod_ref_pkg` is a bit-exact whole-frame software
model of the network that the testbenches compare against. `tb_aod_net_core` runs two 20x14
frames with random gaps and back-pressure. It also counts that border pass-through, ReLU clamping,
saturation, recovery clamping, source stalls, back-pressure and a second frame all occur.
`tb_aod_net_full` runs one 640x480 frame at the default parameters: about 15 s of simulation
after about 30 s of building. Each testbench prints `TB_RESULT checks=N failures=M`.

    verilator --binary --timing --assert -Irtl -Itb -y rtl \
        rtl/aod_pkg.sv tb/aod_ref_pkg.sv tb/tb_aod_net_core.sv --top-module tb_aod_net_core
    ./obj_dir/Vtb_aod_net_core

The loops in the testbenches that span a whole frame use run-time variables as bounds, never
constants. With constant bounds Verilator unrolls them, and building at 640x480 then takes many
minutes.
