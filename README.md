# Holographic video fringe computation and display concentrator

This RTL computes holographic fringe patterns for a horizontal-parallax-only
(HPO) holographic video display at video rate. It also feeds the result to
the display's output channels. A hologram frame is 144 independent
*hololines*, and each hololine is 256 KB of 8-bit fringe samples. Because the
hololines do not depend on each other, the work is split across nine
processor cards. Each card has one FPGA with 256 parallel
multiply-accumulate pipelines. Three video concentrator cards gather the
hololines and stream them to 18 D-to-A channels.

## The computation

The scene is given as 32 perspective views. For hololine `k` the 32 views
supply a *hogel vector* of 32 pixel bytes at each of 256 hogel positions
`j`. Each view also has a precomputed *basis fringe* of 1024 bytes, which is
the diffraction pattern that sends light toward that view's direction. Every
sample of the hololine is a superposition:

```
H(p, k) = sum_{i=0..31} pixel_i(j, k) * basis_i(n),    p = j*1024 + n
```

Products are 16 bits wide. The 32-term sum fits in 21 bits, because
32·255·255 = 2,080,800 < 2^21. The frame is then normalised to the 8-bit
range of the display:

```
fringe(p, k) = H(p, k) / (alpha_max / 255)          alpha_max = max over the frame
```

This uses a 13-bit denominator (alpha_max/255 ≤ 8160), a 21-bit numerator and
an 8-bit quotient.

## Processor FPGA (`holo_fpga`)

This is the part that needs the most care.

**Memories.** The basis fringes (32 × 1024 bytes) and the hogel vectors of up
to `PIX_LINES` hololines (32 × 256 bytes each) sit in on-chip memory. Both are
loaded over the card's 64-bit bus. Basis memory row `m*VIEWS + i` holds
`basis_i(m*LANES + l)` in byte `l`. A row is therefore one byte for each
pipeline.

**Schedule.** Pipeline `l` always computes samples `n = m*LANES + l`, for
segment `m` = 0..3. The sequencer runs through hololine `t`, hogel `j`,
segment `m` and view `i`, innermost last. Each clock it broadcasts one pixel
byte `pixel_i(j, t)` to all 256 pipelines, and each pipeline reads its own
basis byte from the current row. After 32 clocks all pipelines hold finished
sums for 256 *consecutive* samples `j*1024 + m*256 + 0..255`.

**Drain.** Those 256 sums are captured in a bank. The bank is read out 8 per
clock over the next 32 clocks, while the pipelines work on the next 32 views.
This needs `LANES/8 ≤ VIEWS`. Output therefore flows at 8 samples per clock,
in hololine order. One hololine takes 256 · 4 · 32 = 32,768 clocks per card.

**Normalise and format.** Eight `holo_normalizer` pipelines divide the
values. `holo_formatter` packs the 8 bytes into a link word. It marks the
first and last words of a hololine and tags each word with its hololine
index. The words then go through a small FIFO to the card's high-speed link.

**Stalls.** One enable signal, `adv`, moves every stage. It drops when the
link FIFO is full, or, in the compare pass, when `raw_ready` is low. The
whole engine then freezes in place, so no data is lost and no skid buffers
are needed.

### Operating modes

Register `REG_CTRL` selects the mode (`holo_pkg::mode_e`):

| mode | what the card does |
|---|---|
| `MODE_MAC_CMP` | Computes the hololines and sends raw 21-bit values out on the raw port, 8 values in 24-bit slots per transfer (3 bus words). `holo_alpha_max` tracks the largest value. At the end, `holo_scale_div` computes alpha_max/255 into the denominator register. |
| `MODE_NORMALIZE` | Normalises raw values written back into the stream region (3 bus words per 8 values) and sends them on the link. |
| `MODE_TANDEM` | Computes and normalises in one pass with the denominator in `REG_DENOM`. Nothing is stored and there is no compare. |
| `MODE_PASSTHRU` | Sends precomputed fringe words from the stream region to the link unchanged. |

A frame normalised exactly takes two passes:

1. `MODE_MAC_CMP` on every card.
2. The host takes the largest `alpha_max` of the nine cards, divides it by
   255 and writes it to every card's `REG_DENOM`.
3. Then either `MODE_NORMALIZE` on the stored values, or `MODE_TANDEM`, which
   recomputes instead of reading back.

`MODE_TANDEM` on its own, with a denominator from an earlier frame or a fixed
one, is the single-pass video-rate option.

### Bus map (word addresses, `BUS_AW` = 20)

| `addr[19:18]` | region | contents |
|---|---|---|
| 0 | registers | 0: `REG_CTRL` = {line count [31:16], start [8], mode [1:0]}; 1: `REG_DENOM` [12:0] |
| 1 | basis | word `row*(LANES/8) + chunk`, byte `b` → pipeline `8*chunk + b` |
| 2 | pixel | byte address `(t*HOGELS + j)*VIEWS + i` |
| 3 | stream | input FIFO for `MODE_NORMALIZE` / `MODE_PASSTHRU`; `bus_ready` low while full |

The bus is write-only. Status comes out on the ports `busy`, `done`,
`alpha_max` and `denom`.

## Video concentrator card (`vcc_card`, `vcc_coproc`)

Each concentrator takes three processor-card links. Each link feeds two
hololine FIFOs: even hololines of a card go to FIFO `2c`, odd ones to
`2c+1`. Each FIFO holds one full hololine (32,768 × 65 bits). A link is held
off while its target FIFO is full.

The co-processor counts complete hololines per FIFO. It raises `line_ready`
when all six FIFOs hold one. On `line_go` it reads all six FIFOs in lockstep,
one byte per channel per clock, onto `dac_code[5:0]`. `dac_sol` marks the
first sample of each line.

In `holo_top`, `line_go` is the AND of the three concentrators' `line_ready`,
so all 18 channels start every display line together.

## Top level (`holo_top`)

- Nine `holo_fpga` instances. Card `c` drives link `c % 3` of concentrator
  `c / 3`.
- Three `vcc_card` instances.

Parts that are not logic in this design appear as ports:

- **Per-card bus** (`bus_*`): the PCI bridge and card SDRAM side.
- **Per-card raw-result port** (`raw_*`): writes into card memory.
- **DAC codes** (`dac_*`): input to the converters.

The serial link PHYs are modelled as parallel valid/ready word links
(`link_word_t`: line tag, sol, eol, 64 data bits). With the defaults,
`PIX_LINES` = 16 per card gives the full 144-hololine, 36 MB frame.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_CARDS` | 9 | processor cards |
| `LINKS` | 3 | cards per concentrator (6 channels each) |
| `VIEWS` | 32 | perspective views / basis fringes |
| `LANES` | 256 | pipelines per FPGA (must be a multiple of 8, `LANES/8 ≤ VIEWS`) |
| `BASIS_LEN` | 1024 | samples per basis fringe (multiple of `LANES`) |
| `HOGELS` | 256 | hogels per hololine |
| `PIX_LINES` | 16 | hololines per card in one run |

Fixed widths are in `holo_pkg`: 8-bit data, 16-bit products, 21-bit sums,
13-bit denominator, 64-bit bus and link.

## Timing

| path | latency |
|---|---|
| `holo_mac` | 2 enabled clocks from the last pair to the result |
| capture and drain | results leave 1–32 clocks after capture |
| `holo_normalizer` | 9 enabled clocks |
| `holo_formatter` | 1 clock |
| `holo_scale_div` | 21 clocks per frame |
| concentrator | DAC codes start 2 clocks after `line_go` |

Throughput per card is one 8-byte link word per clock. A frame on one card
takes 16 × 32,768 = 524,288 clocks, so 30 frames/s needs about 16 MHz. The
concentrator side shows 8 rounds of 262,144 samples per channel per frame,
so 30 frames/s needs a 63 MHz read-out clock. Both figures are worked out
here from the schedule. No clock frequency is specified.

## How this relates to the published design, and what is this design's own

These follow the published system:

- nine processor cards and three concentrators;
- 256 pipelines per FPGA;
- 32 views, 1024-byte basis fringes, 256 × 144 pixel views;
- the widths 8×8 → 16, 21-bit sums, 21-bit comparator, and 21/13 → 8
  dividers;
- the multiply → accumulate → compare → ÷255 → normalise → format chain;
- the single-pass, stored-normalise and pass-through options;
- each concentrator link feeding two FIFOs, six DAC channels, and a
  co-processor that starts and ends FIFO loading and read-out.

These are this design's own choices:

- the pipeline-to-sample mapping and the capture/drain bank;
- on-chip storage of basis and hogel data;
- the bus address map;
- the link word layout and framing;
- valid/ready flow control;
- FIFO depths;
- parity routing of hololines to FIFOs;
- the AND for starting display lines;
- how hololines are shared between cards (16 each);
- saturation at 255 and a minimum denominator of 1;
- sequential division for alpha_max/255;
- asynchronous active-low reset.

Not built:

- the PCI bridge, SDRAMs, LVDS PHYs, the concentrator microprocessor and
  video SDRAM;
- the DACs, RF stage and optics;
- any host software.

A named divide-by-8192 denominator does not fit the 13-bit denominator
width. The width was kept, and 8191 is the largest denominator.

## Simulating

Every file has its module's name. Packages must be read first. Example with
plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/holo_pkg.sv tb/tb_holo_top.sv \
          --top-module tb_holo_top -o sim -y rtl -y tb
obj_dir/sim
```

Each bench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog.

| bench | what it checks |
|---|---|
| `tb_holo_mac`, `tb_holo_alpha_max`, `tb_holo_scale_div`, `tb_holo_normalizer`, `tb_holo_formatter`, `tb_holo_bus_if`, `tb_holo_sync_fifo` | Unit benches with random stimulus, independent models, and latency checks. |
| `tb_vcc_coproc`, `tb_vcc_card` | Routing, back-pressure, line-ready rule, and lockstep read-out. |
| `tb_holo_fpga` | A reduced FPGA (4 views, 32 pipelines) in all four modes. Checks every value, alpha_max, the denominator, and one word per clock. |
| `tb_holo_top` | All nine cards and three concentrators at reduced size. Runs the two-pass flow and all four modes, and checks every DAC sample. Requires that link back-pressure, raw-port stalls and synchronised line starts each happen. |
| `tb_holo_top_full` | Every parameter at its default. Runs the compare pass (checks all raw values and the one-group-per-clock rate), then the frame-wide denominator, then a complete 144-hololine frame. Checks all 37.7 M DAC samples. Takes about 1–2 minutes in Verilator. |

Testbench data is generated from hash functions and `$urandom`. No data files
are needed.
