# A 4×4 in-memory-computing neural-network accelerator in SystemVerilog

Matrix-vector multiplication dominates neural-network inference. This design does it inside
SRAM: each core holds a 1152×256 array of bit cells. Every cell multiplies one stored weight bit by
one input bit, and each column sums its products at once. One array access thus does
1152×256 one-bit multiply-accumulates. The catch is that such an array is dense and costly to
rewrite. A useful accelerator therefore needs programmable digital logic around it and a network
between cores, so that whole networks can be mapped across many arrays with little weight
reloading.

The design is a 4×4 grid of compute-in-memory units (CIMUs, "cores"). Each core has:

- input buffering;
- the in-memory array with its column ADCs;
- two SIMD engines;
- an output buffer.

The cores are linked by a configurable, bit-serial on-chip network (OCN). The chip also has:

- a weight-loading network;
- a 128 kB I/O buffer that moves activations between a host and the network;
- one configuration bus.

Everything is parameterised, and every parameter defaults to the full-size design:
16 cores × 1152 × 256 cells = 4.7 Mb of weight storage.

## How a core computes: bit-parallel / bit-serial (BPBS)

A `B_w`-bit weight matrix is stored with its bits side by side. Output `k` owns four adjacent
columns `4k..4k+3`, one per weight bit (4-b weights). Rows are the inner dimension.

The `B_x`-bit input vector is applied one bit-plane at a time, LSB first. For plane `p` and
weight bit `j`, column `4k+j` returns

    c[p][j] = Σ_r x_r[p] · w_rk[j]          (AND mode)

digitised by an 8-b ADC. The BPBS engine rebuilds the multi-bit product:

    y_k = Σ_p Σ_j ±c[p][j] · 2^(p+j)

The `−` sign applies to the two's-complement weight MSB (`j = B_w−1`). An XNOR mode supports
±1 binary encodings.

A 4-b × 4-b product therefore costs 4 array conversions of 16 MACs per lane. That is one MAC
instruction per (plane, weight bit).

The dataflow inside `cimu`:

```
 in_lanes[0..7] ──► input_buffer ──bit-planes──► cima ──256 ADC codes──► bpbs_simd ──► cmpt_simd ──► out_lanes[0..15]
 in_lanes[8..11] ─► shortcut_buffer ─┬─ vector ─────────────────────────┴─────────────┘
                                     └─ bypass ──────────────────────────────────────────────► out_lanes[16..19]
 wl_we/row/data ─────────────────────────► cima (row write)
 f2f_in / f2f_out ◄──────────────────────► bpbs_simd accumulator (partner core)
```

### CIMA (`cima.sv`, behavioural)

This is a bit-true model of the analog array:

- It computes the exact column counts.
- ADC code = `min(255, count >> adc_shift)`.
- A conversion takes `ADC_LAT` = 10 clocks, i.e. 20 MS/s conversions with 200 MHz logic.
- Rows at or above `active_rows` are gated off, for kernels smaller than 1152 rows.
- Extended mode joins column pairs into a 2304×128 array: the upper half of a 2304-element input
  drives the odd column of each pair.
- The result is held until the BPBS engine acknowledges it, so a slow consumer back-pressures the
  array.

The model has no noise, mismatch or INL.

### Input buffer (`input_buffer.sv`)

There are eight banks, one per input lane. A bank's fill is `pad_lead[b]` locally generated zeros
(zero padding) followed by `fill_cnt[b]` elements from its lane. The banks pack densely from row 0,
so a flattened kernel always starts at the bottom of the array. For example, a 3×3 kernel over
128 channels needs exactly 1152 rows.

**Window reuse.** `keep[b]` is config register 3 of bank `b`. Once a bank has handed a vector
over, it moves its newest `keep[b]` elements to the front of its region and takes only
`fill_cnt[b] − keep[b]` new ones. If a window is stored column by column, this slides a stride-1
kernel by one pixel; for 3×3, two of three window columns stay. Writing register 4 (restart)
makes the next fill a complete one, for the first window of a row.

With `nfill2` set, two fills are added element-wise with saturation. This lets a core sum the
outputs of two other cores.

A finished vector is copied to a sequencing register and sent as `xbits` planes while the next
one fills. An element that arrives while its bank is padding, full or handing over waits in a
one-entry holding register. Keep upstream lanes paced so that no second element arrives before
the first is taken: the network has no back-pressure.

### Shortcut buffer (`shortcut_buffer.sv`)

This is a FIFO fed by its own four lanes. Each element is time-stamped and leaves only after
`latency` cycles; this delays a residual path to meet the main pipeline. Leaving elements either:

- build a vector of up to 256 elements for the SIMD engines; or
- in bypass mode, go round-robin straight back out on lanes 16..19 (shuffles, path delays).

### BPBS SIMD (`bpbs_simd.sv`)

There are 64 lanes, each multiplexed over four columns. All lanes run one 32-bit instruction per
clock from a 128-entry buffer (`simd_seq.sv`).

| op | meaning |
|---|---|
| `WAIT_ADC` | stall until the array has codes; latch and release them |
| `MAC col,src,shift,neg,lexp` | `v = x·gain[k] + offset[k]`, then `acc ±= v << (shift [+ lexp[k]])`. `x` is the code of column `4k+col`, or a shortcut element. |
| `F2F` | stall until the partner core offers partial sums; add them |
| `SEND clr,f2f` | hand the accumulators to the CMPT engine (or, with `f2f`, to the partner core) |
| `CLR`, `WAIT_SC`/`REL_SC`, `NOP`, `LOOP` | clear; shortcut vector handshake; alignment; back to entry 0 |

Per-lane gain and offset serve ADC correction and batch-norm scale/bias. `lexp` is a per-lane
power-of-two exponent. Instruction bit layout, LSB first:

- op[3:0], col[1:0], src, neg, shift[4:0], lexp, clr, f2f;
- 16 reserved bits.

### CMPT SIMD (`cmpt_simd.sv`, `out_buffer.sv`)

There are 16 datapaths, each serving four BPBS lanes, on one instruction stream. An ALU
instruction takes two operands. Each operand comes from:

- a BPBS result (`4m + r`);
- a shortcut element (`16m + r`);
- a register;
- a 5-bit immediate.

Each operand can be shifted left by 0..7. The ALU operations are ADD, SUB, MUL, MAX, MIN, RELU,
AVG, MOV, SRA and QNT (clip to `0..2^obits−1`).

Registers:

| number | role |
|---|---|
| 0–15 | general purpose; preloadable over the configuration bus |
| 16 / 17 | read the left / right neighbour's exchange value; writing either sets this datapath's own (the datapaths form a ring) |
| 18 | LUT address |
| 19 | data of the shared 256-entry LUT at that address (sigmoid, tanh, …), with no extra instruction |
| 20 | write-only: push to the output buffer |

The output buffer serialises each datapath's results, LSB first, onto output lane `m`.

Instruction bit layout, LSB first:

- op[2:0], alu[3:0], dst[4:0];
- sa[1:0], ra[4:0], sha[2:0];
- sb[1:0], rb[4:0], shb[2:0].

The ops are `WAIT_IN`/`REL_IN` (BPBS results), `WAIT_SC`/`REL_SC`, `ALU`, `NOP` and `LOOP`.

Wider weights (8 b) are built in software: two lanes, combined with a shift in the CMPT engine.

### Face-to-face link

Each core is paired with the core beside it: core `i` with `i^1`, i.e. columns 2k and 2k+1.
A core whose inner dimension is split over two arrays sends its accumulators with `SEND f2f`.
Its partner adds them with `F2F`. Both sides use a valid/acknowledge handshake.

## On-chip network

All links are 1 bit wide. An element of `N` bits crosses a link LSB first in `N` consecutive
cycles with `vld` high (`ser_t`).

The array is built from 2×2 tiles (`ocn_tile.sv`, core `q = 2·row + col` in the tile). A
registered switch block (`ocn_switch_block.sv`) sits at the tile centre. It has four arms of 80
bidirectional channels; sides are numbered N=0, E=1, S=2, W=3.

- **Switch block:** it is *disjoint*. Outgoing channel `i` of a side can only take incoming
  channel `i` of one of the other three sides. The selector is 0 off, or `k` = side `(s+k) mod 4`.
  It adds one cycle.
- **North/south arms: output blocks** (`ocn_output_block.sv`). These run between the left and
  right core of a row.
  - Each channel has a configured direction and two registers.
  - Between the registers, any of the 40 output lanes of the two cores can replace the passing
    traffic. This gives full output connectivity.
  - The north arm takes cores 0/1 (sources 1..20 / 21..40); the south arm takes cores 2/3.
- **West/east arms: input blocks** (`ocn_input_block.sv`). These run between the upper and lower
  core of a column.
  - Each of a core's 12 input lanes taps one channel of a fixed 20-channel subset: lane `t` may
    read channel `(t mod 4) + 4j`, j = 0..19.
  - A tap reads the entry register, so tapped traffic travels on.
  - West serves cores 0 (taps 0..11) and 2 (12..23); east serves cores 1 and 3.

Facing arms of neighbouring tiles are wired together. Array-edge arms are idle, except tile 0's
west arm, which carries the I/O buffer:

- its TX drives channels 0..7;
- its RX listens on channels 8..15.

Routes are set entirely by configuration; nothing is packet-switched. A path's latency is the sum
of its registers:

- 1 per switch block;
- 2 per arm traversed;
- 1 to a tap.

## Weights, host side and configuration

**Weight loading** (`wl_network.sv`): a row of weight bits, its row address and a core mask enter
through `wl_*`. A two-stage pipeline delivers the row to the write port of every masked core, so
replicated weights are written once. The weight buffer that feeds this stream is external.

**I/O buffer** (`io_buffer.sv`): 128 kB of 8-b activations with a host port (write; registered
read).

- TX streams `tx_count` elements from `tx_base`; element `i` goes on lane `i mod 8`.
- RX stores `rx_count` arriving elements from `rx_base`. Elements completing in the same cycle are
  stored in lane order.

**Configuration bus** (`cfg_req_t`: we, addr[23:0], data[31:0]). `addr[23:19]` selects the unit:

| unit | local address |
|---|---|
| 0–15: core `row·4+col` | `addr[18:16]`: 0 input buffer, 1 CIMA control, 2 BPBS, 3 CMPT, 4 shortcut buffer |
| 16–19: tile `row·2+col` | `addr[12:10]`: 0 switch (`[9:8]` side, `[6:0]` channel, data = selector), 1 N arm, 2 S arm, 3 W arm, 4 E arm |
| 20: I/O buffer | 0 tx_base, 1 tx_count (starts), 2 rx_base, 3 rx_count (arms), 4 element bits |

Core unit registers:

- **Input buffer:** 0 = {nfill2[5], xbits[3:0]}; 1 = fill_cnt of bank `addr[2:0]`; 2 = pad_lead;
  3 = keep; 4 = restart.
- **CIMA control:** {active_rows[17:6], adc_shift[5:2], ext[1], xnor[0]}.
- **BPBS:** `addr[15:12]` 0 instruction `addr[6:0]`, 1 gain, 2 offset, 3 local exponent (lane
  `addr[5:0]`), 4 run.
- **CMPT:** 0 instruction, 1 register preload (datapath `addr[9:4]`, register `addr[3:0]`),
  2 LUT entry, 3 {obits[7:4], run[0]}, 4 read-out select {datapath[9:4], register[3:0]}.
  The selected register of the core written last appears on the top's `cfg_rdata`, for
  debugging.
- **Shortcut buffer:** {bits[25:22], vec_len[21:13], bypass[12], latency[11:0]}.

Arm registers:

- **Output arm:** channel `addr[6:0]`, data = {dir[6], src[5:0]}. src 0 means pass-through; dir 0
  means outer→inner.
- **Input arm:** `addr[7]=0` sets channel `addr[6:0]` direction = data[0]. `addr[7]=1` sets lane
  `addr[4:0]` subset index j = data[4:0].

`core_ev` exposes per-core activity pulses that can serve as performance counters:

- vector done, pad;
- BPBS/CMPT stall, F2F add;
- shortcut pop/bypass;
- LUT read, exchange read.

## What it can hold

One core holds a 1152-deep, 64-output layer slice at 4-b weights. All 16 cores hold 4,718,592 bits.

- **11-layer VGG-style CIFAR-10 network** (4×CONV3×3-128, 4×CONV3×3-256, 3×dense-1024, 4-b
  weights). The convolutions alone are 2.5 M weights = 10 Mb, or 36 core-loads. They must be
  streamed through the weight-loading port in layer groups.
- **ResNet-50** (about 23.5 M convolution weights, 94 Mb at 4 b). It runs only layer group by layer
  group from the external weight buffer. Its largest 3×3×512 kernel (inner dimension 4608) spans
  four cores chained with face-to-face and element-wise adds.

## Departures from the original design

- The array is modelled ideally: exact counts and a simple shift-and-saturate ADC. The real array
  is analog, with its own ADC transfer, noise and INL.
- Each input-buffer bank takes one bit-serial lane at the core clock. The original line
  buffers' input multiplexing, which runs faster than the array clock, is not modelled. Window
  reuse is modelled as a shift of the kept elements.
- The SIMD engines execute one instruction per clock in a single stage rather than a deep
  pipeline. There are no hazards, so `NOP` is only needed for alignment.
- These are this design's own choices:
  - instruction encodings, the ALU operation list and the LUT size;
  - lane counts (12 in, 20 out per core);
  - the input-tap subset pattern, the arm placement in a tile and the configuration address map;
  - the I/O buffer's streaming engines.
- Configuration is write-only, except for one read-back port (`cfg_rdata`). That port shows a
  single CMPT register chosen for debugging.
- The network has no flow control. A mapping must pace its streams, as the hardware routes are
  static.
- The weight buffer, clock generation and host interface are outside this RTL. Weights come in on
  `wl_*`; there is one clock.

## Simulating

Every testbench is self-checking. It ends with `TB_RESULT checks=N failures=M`, has a watchdog,
and uses only `$urandom`. A file list is not needed beyond the package:

```
verilator --binary --timing --assert -Irtl -Itb rtl/imc_pkg.sv tb/tb_cimu.sv --top-module tb_cimu
./obj_dir/Vtb_cimu
```

Unit testbenches cover every module: `tb_cima`, `tb_input_buffer`, `tb_shortcut_buffer`,
`tb_simd_seq`, `tb_bpbs_simd`, `tb_cmpt_simd`, `tb_out_buffer`, the three OCN blocks, `tb_ocn_tile`,
`tb_wl_network`, `tb_io_buffer`. Most run at reduced sizes through parameter overrides.

- **`tb_cimu`** runs one core end to end at 36×16. It covers:
  - weights, padding, four bit-planes, the signed MAC program, the face-to-face add;
  - ReLU / shift / quantise;
  - shortcut bypass.

  It checks every output against a reference dot product.
- **`tb_imc_accel_top`** runs the full-size chip with default parameters. Build takes about 40 s,
  and the run takes seconds.
  - The host loads two input vectors; the second is a window slide that reuses part of the first.
  - The I/O buffer streams them over tile 0's network to cores 0 and 1, which hold the same weights
    from one multicast load.
  - Core 1 sends its partial sums face to face; core 0 adds them and applies ReLU, shift,
    quantisation, a LUT lookup and a neighbour exchange.
  - Its outputs are injected onto the network, routed back to the I/O buffer and read by the host.

  All 64 returned values are checked, and so are four CMPT registers read back over the
  configuration path. The testbench also counts each mechanism: multicast, padding, window
  reuse, stall, F2F, bypass, LUT, exchange, injection. It checks that each input vector costs
  exactly four array conversions of at least `ADC_LAT` cycles each.
- **`tb_vgg_conv_core`** runs one full-size core on one output pixel of a 3×3, 128→64-channel
  convolution, the shape of the CIFAR-10 VGG network's 128-channel layers.
  - The flattened kernel fills all 1152 rows.
  - The ADC range is set to `count >> 2`, because column counts exceed 255.
  - The reference model reproduces that 8-b quantisation bit-exactly.
  - Every one of the 64 outputs is checked for two pixels, along with the number of conversions.
