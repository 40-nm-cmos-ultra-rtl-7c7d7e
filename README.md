# Ultra-low-power keyword spotter: MFCC front end + DSCNN classifier

This design listens for a small set of spoken keywords. It does this with very
little hardware. Audio arrives in frames of 256 samples (32 ms at 8 kHz). A
serial **MFCC front end** turns each frame into 10 cepstral coefficients.
After 52 frames, a 52 x 10 feature window is complete. A **depthwise-separable
CNN (DSCNN)** then classifies the window into 12 classes.

The main idea is to trade speed for area. The chip has time to spare: at
100 MHz one frame takes about 13,000 cycles, and one inference takes about
2.3 million cycles (23 ms). So the whole chip uses **one 18 x 16 signed
multiplier**. The front end and the network engine share it through an
arbiter. Everything else is built to keep that multiplier busy only when it
must be:

- the FFT does a complex rotation with three multiplies instead of four;
- the Mel filters are rectangular, so they need only adds;
- the log is a piecewise-linear fit;
- in the network, any product with an operand of 0 or 1 skips the
  multiplier (bypass);
- activations are reused from small local buffers instead of re-read.

Everything is plain synthesizable SystemVerilog. The SRAMs are written as
memory arrays, with the sizes of the intended macros: 256x32, 992x16,
7296x8 and 22016x8.

## Data flow

```
 host ──► data SRAM 256x32 ──► cal_fsm / cal_mode ──► 10 x int16 features
 host ──► param SRAM 992x16 ─┘        │                       │ >>> cfg_feat_shift,
                                      │ shared multiplier     │ saturate to int8
                                      ▼                       ▼
                           multiplier_arbiter ◄── dscnn_layer_engine ◄── activation SRAM 7296x8
                                      │                 ▲                 (input window rows)
                                   multiplier           └── weight SRAM 22016x8 ◄── host
```

`kws_top` instantiates `mfcc_top` (front end), `dscnn_top` (back end),
`multiplier_arbiter` and `multiplier`. A small bridge in `kws_top` does three
things:

1. It turns each 16-bit coefficient into a signed 8-bit activation. It shifts
   the value right arithmetically by `cfg_feat_shift`, then saturates it.
2. It writes the activation to row `frame_cnt`, column `feat_idx` of the input
   window.
3. After row 51 it starts an inference. If the back end is still busy, the
   start waits until it is free. Then `frame_cnt` wraps to 0.

Windows do not overlap: every 52 frames give one inference. The host can also
write the input window itself and pulse `dscnn_start`.

Feature writes are held back while the first layer reads the input window
(`in_cl`). During that time the front end stalls on its feature port. After
the first layer, new frames can fill the window while the later layers run.

## Front end (`mfcc_top` = `cal_fsm` + `cal_mode` + two SRAMs)

The front end is split into a **controller** and a **datapath**:

- `cal_fsm` is the controller. It steps through
  `IDLE → WINDOW → STFT → REVERSE → POWER → MEL → LN → DCT → DONE`. In each
  state it issues *step records*: the state plus up to three addresses
  (a0, a1, a2). The FFT butterfly needs two data addresses and one table
  address; other states set unused addresses to zero.
- `cal_mode` is the datapath. It runs a small local phase machine for the
  current state. It does the SRAM and multiplier handshakes, then sends an
  `upd` pulse back. `upd_code` says "next item" or, in MEL and LN, "close
  this band / try the next segment".

Data SRAM word format: `{re[15:0], im[15:0]}`. The host writes samples into
`re` with `im = 0`. The FFT runs in place, and the later stages reuse the same
words.

| State | Work per item | Arithmetic |
|---|---|---|
| WINDOW | x[n]·w[n] | w in Q1.15; only half the Hamming window is stored (it is symmetric) |
| STFT | radix-2 decimation-in-frequency butterfly, log2 N stages | each stage scales by 1/2; twiddles in Q2.14 |
| REVERSE | swap X[k] and X[bitrev(k)] when bitrev(k) > k | no multiply |
| POWER | re² + im², 32-bit, bins 0…N/2 | 2 multiplies, no square root |
| MEL | add up the power of bins 1…N/2 into 40 bands | band b ends at bin edge[b]; sum >> cfg_mel_shift, saturated to 16 bits |
| LN | find segment q with bound[q-1] < x ≤ bound[q], then y = (a_q·x >> 12) + b_q | up to `cfg_ln_seg` (4, 6 or 8) segments |
| DCT | c[r] = Σ y[i]·D[r][i] >> 15, r = 0…9 | D in Q1.15 |

**The butterfly** is the hard part. It computes

- sum = (a + b) / 2
- diff = (a − b) / 2

It writes the sum back at once. For the diff it forms three products with the
twiddle W = cos − j·sin:

- m1 = (d_re + d_im)·cos
- m2 = d_im·(sin − cos)
- m3 = d_re·(sin + cos)

Then Re = m1 + m2 and Im = m1 − m3. The table holds each twiddle as the
triple (cos, sin − cos, sin + cos). The sum write-back overlaps with the
multiplies. A butterfly takes about 8 cycles when it does not wait for the
multiplier.

**Parameter SRAM layout** (N = 256, 40 bands, 10 coefficients; 976 of 992
words used). The package functions `lut_*_base()` compute these offsets:

| Words | Content | Formula |
|---|---|---|
| 0…127 | half Hamming window | round(32767·(0.54 − 0.46 cos(2πn/(N−1)))) |
| 128…511 | 128 twiddle triples | round(16384·{cos θ, sin θ − cos θ, sin θ + cos θ}), θ = 2πk/N |
| 512…551 | last FFT bin of each Mel band | from the mel scale, kept strictly increasing |
| 552…575 | 8 log segments: upper bound, slope (Q.12), intercept | chord of the curve you want (e.g. 64·ln x) between the segment bounds |
| 576…975 | DCT matrix, row-major | round(32767·cos(πr(i + ½)/40)) |

The table contents are data, so other windows, band edges or log fits need
no RTL change.

## Back end (`dscnn_top`)

### The network

| Layer | Operation | Output | Weights |
|---|---|---|---|
| CL | 10x4 conv, stride 2x2, 4 rows of zero padding at the top, signed int8 input | 26 x 4 x 64 | 2560 |
| DW k (k = 0…3) | 3x3 depthwise, pad 1 | 26 x 4 x 64, in place | 576 |
| PW k | 1x1 pointwise 64→64 | 26 x 4 x 64, in place | 4096 |
| AP | global average | 64 | – |
| FC | 64→12 (run as a 1x1 pointwise layer) | 12 signed scores | 768 |

The weights total 22,016 bytes, exactly the weight SRAM depth. There are no
biases. Every multiply-accumulate layer ends with a requantisation:
Y = clip((A · C) >>> S). Here A is the 32-bit accumulator, and C
(`layer_scale`, unsigned 16-bit) and S (`layer_shift`) are set per layer.
The clip range is [0, 255] after CL, DW and PW, which acts as a ReLU. After FC
it is [−128, 127]. Batch-norm terms must be folded into C and S offline.

**Weight layout** (byte addresses; all weights are int8):
- CL: `ch*40 + ky*4 + kx`
- block k: base `2560 + k*4672`
  - DW: `ch*9 + ky*3 + kx`
  - PW: `576 + oc*64 + ic`
- FC: `21248 + class*64 + ic`

**Activation memory map** (channel-major, `channel*104 + row*4 + col`):

| Words | Content |
|---|---|
| 0…6655 | feature maps (one 26x4x64 region, overwritten by every layer after CL) |
| 6656…7175 | input window, 52 rows x 10 coefficients |
| 7176…7239 | pooled vector |
| 7240…7251 | class scores (int8) |

### The compute engine (`dscnn_layer_engine`)

One engine runs every convolution and the FC layer. `dscnn_control` gives it a
`layer_cfg_t` record for each layer. The record holds the kind, sizes, stride,
padding, SRAM bases, scale, shift, ReLU flag and input signedness. The engine
is a four-stage pipeline with a valid/ready handshake between stages:

- **s0** counts loops and makes addresses. It marks each tap as one of:
  zero padding, a read from the register file, a register-file load, or the
  last tap of an output point.
- **s1** holds the request until the activation SRAM grants the read. It then
  issues the activation and weight reads together.
- **s2** picks the operand: SRAM data, the register file, or zero. If either
  operand is 0, or either is 1, it produces the product itself (**bypass**).
  Otherwise it asks for the shared multiplier and waits for the grant.
- **s3** accumulates. On the last tap it scales, shifts, clips, and pushes the
  result into a write-back queue.

SRAM reads have a latency of one cycle. The activation SRAM keeps its read
data until the next read, so s2 may stall on the multiplier without losing
data. Other requesters only write while a layer runs, so no one else reads in
between.

**Depthwise layers run in place.** Output (r, c) overwrites input (r, c). That
input is still needed until output (r+1, c+1) has been computed. So the
write-back queue holds the last W + 1 outputs (W = 4) and writes each one only
after output (r+1, c+1) is done. At the end of each channel the queue
empties.

**Pointwise layers** work one position at a time. The engine first loads the
64 input activations of that position into a 64-entry register file. Then it
computes all 64 output channels from the register file and writes them over
the same position. Each input activation is read from SRAM once.

**Average pooling** (`ap`) sums the 104 values of each channel. It multiplies
the sum by round(65536/104), shifts right by 16, and clips the result to
[0, 255].

### Memory arbitration

Each SRAM is single-ported and sits behind an `sram_arbiter`. The arbiter uses
fixed priority and grants in the same cycle. Read data comes one cycle after
the grant.

Activation SRAM priority, highest first:
1. host
2. engine write-back
3. pooling unit
4. engine read
5. feature writer

Weight SRAM priority: host first, then the engine.

`multiplier_arbiter` uses round-robin between the front end and the engine.
It tags each request, so the product returns one cycle after the grant to the
requester that asked.

## Using it

1. Reset. Then write the parameter table through `hl_*` and the weights
   through `h_w_*`. Set `layer_scale`/`layer_shift` and the three `cfg_*`
   inputs.
2. For each frame:
   1. write 256 samples into `re` of the data SRAM through `hd_*`;
   2. pulse `frame_start`;
   3. wait for `frame_done`.

   The host must not use the data SRAM while `mfcc_busy` is high.
3. After 52 frames the inference starts by itself. `dscnn_finish` pulses when
   the scores are in words 7240…7251. Read them through `h_act_*`, but only
   while `dscnn_busy` is low.

The `ev_*` outputs pulse each cycle that a mechanism is active: bypass,
multiplier stall, read stall, register-file reuse, multiplier contention,
held feature write, and automatic start. They are meant for counters and
tests.

## Measured timing (100 MHz reference clock)

| Step | Cycles | Reference figure |
|---|---|---|
| one frame (front end alone) | ≈ 13,000 | ≈ 13,000 |
| – windowing | 1,024 | 473 |
| – FFT | 7,199 | 7,720 |
| – bit reversal + power | 616 + 646 | 767 (magnitude) |
| – Mel bands | 336 | 432 |
| – log | 227 | 279 |
| – DCT (without back-pressure) | ≈ 1,600 | 2,001 |
| CL | 273,962 | 272,135 |
| DW layer (mean) | 64,844 | 70,728 |
| PW layer (mean) | 432,751 | 424,428 |
| AP | 6,787 | 6,596 |
| FC | 840 | 786 |
| all layers | 2,271,972 | 2,260,141 |

The cost is close to one cycle per tap. Padding taps and register-file loads
also take a cycle each. Bypassed products take one cycle. Multiplied
products take one cycle when the multiplier is free.

## Where this design departs from, or adds to, the reference architecture

- **Network shape.** The 10x4/2x2 first layer with 4 rows of top padding, the
  26x4 maps and the 12 classes are derived. They are the shape that exactly
  fills a 22016-byte weight memory and reproduces the reference cycle counts
  above. They are not a published specification.
- **Multiplier width.** The multiplier is 18 x 16 bits, so the 16-bit front
  end can use it. The network side only needs 9 x 8 bits.
- **No square root.** The magnitude state computes power (re² + im²).
- **Bit reversal** is a separate swap pass (REVERSE state). The alternative
  would be to read the FFT output in bit-reversed order.
- **Features go straight into the activation SRAM.** There is no separate
  output SRAM.
- **Fixed-point formats are this design's own**: Q1.15 window and DCT, Q2.14
  twiddles, 1/2 scaling per FFT stage, Q.12 log slopes, the feature shift and
  saturation. So are the loop orders, memory maps, arbitration priorities and
  the average-pool reciprocal.
- **Not built:**
  - triangular Mel filters (only the rectangular mode exists);
  - pre-emphasis;
  - frame overlap / sliding windows;
  - the 16 kHz / 512-point mode at the default sizes. The front end is
    parameterised for it (NFFT = 512, parameter SRAM 1488 words, data SRAM 512
    words). At that size it is tested on its own (`tb_mfcc_512`, about 26,000
    cycles per frame), but not inside `kws_top`.
- **Memories are behavioural arrays.** For silicon, the four memories would
  be swapped for foundry SRAM macros with the same single-port read timing.

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=… failures=…`
line.

| Testbench | What it checks |
|---|---|
| `tb_multiplier`, `tb_multiplier_arbiter`, `tb_sram_sp`, `tb_sram_arbiter` | unit checks against simple models; contention and starvation checks |
| `tb_mfcc_top` | three frames (8, 6 and 4 log segments), bit-exact against a reference model of the whole front end written in the testbench, with random multiplier refusals and feature back-pressure; frame latency |
| `tb_mfcc_512` | the same test with the front end built for 16 kHz / 512-point frames |
| `tb_dscnn_top` | the network at a reduced size (12x10 window, 8 channels, 2 blocks, 4 classes), two inferences; the whole activation memory is compared with an integer reference model; bypass, multiplier stall, read stall and reuse must each occur |
| `tb_kws_top` | end to end at a reduced back-end size: 13 frames → features → window → inference, with the 13th frame running during the first layer; every mechanism is counted |
| `tb_kws_full` | the same flow with every parameter at its default: 53 frames and one full 64-channel inference; also checks the layer cycle counts against the table above. It takes a few seconds in Verilator. |

`tb_kws_top` and `tb_kws_full` share their body, `tb/kws_tb_body.svh`.

Run any of them with plain Verilator from the repository root, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/kws_pkg.sv tb/tb_kws_full.sv \
          --top-module tb_kws_full -o sim && ./obj_dir/sim
```

## Files

| File | Contents |
|---|---|
| `rtl/kws_pkg.sv` | states, step record, layer configuration record, parameter-table layout |
| `rtl/kws_top.sv` | top level and feature bridge |
| `rtl/mfcc_top.sv`, `rtl/cal_fsm.sv`, `rtl/cal_mode.sv` | front end |
| `rtl/dscnn_top.sv`, `rtl/dscnn_control.sv`, `rtl/dscnn_layer_engine.sv`, `rtl/ap.sv` | back end |
| `rtl/multiplier.sv`, `rtl/multiplier_arbiter.sv` | shared multiplier |
| `rtl/sram_sp.sv`, `rtl/sram_arbiter.sv` | memories |
| `tb/` | testbenches |
