# Back-projection SAR imaging accelerator

This is a fully pipelined FPGA datapath that forms a 512 × 512 pixel
synthetic-aperture-radar (SAR) image with the time-domain back-projection
algorithm. For every pixel and every radar pulse it does four things:

1. It computes the range R from the platform to the pixel.
2. It picks the range sample at R and interpolates it linearly.
3. It multiplies that sample by the phase term exp(j·2·ku·R).
4. It adds the result into the pixel.

One (pixel, pulse) pair enters the pipeline every clock cycle. At 140 MHz a
full image (262,144 pixels × 512 pulses) takes 134 million cycles, just under
one second.

The design follows the accelerator of the thesis "Back-Projection Algorithm
Optimization for On-Board Embedded SAR Imaging System". That accelerator
targets a Zynq-7010 (Zybo Z7-10). The processor, the DMA engines and the DDR
memory are outside this RTL. The accelerator sees them only as AXI-Stream
ports.

## The schedule: why regions

The naive loop order runs pulses innermost for each pixel. That order needs
all 512 pulses' samples at once, which is 16 MB and far more than the
device's block RAM. The order with pixels innermost for each pulse needs the
whole image as on-chip accumulators, which does not fit either. The design
uses a *pixel-region* schedule instead:

```
for region in 0..31            (16 image rows = 8192 pixels each)
  for pulse in 0..511
    for iy in 0..15, ix in 0..511   (columns fastest)
      acc[iy][ix] += contribution(pixel, pulse)
```

- **Accumulators:** only one region needs them at a time. B3 holds 8192 words
  for each of the real and imaginary parts.
- **Samples:** only two pulses need to be on chip. B2 is a double buffer of
  2 × 4096 words.
- **Sample loading:** one pulse is loaded while the other is used. A pulse
  takes 8192 cycles of work but only 4096 cycles to load, so loading stays
  ahead.
- **Cost:** the whole sample file streams in 32 times, once per region.
- **Output:** on the last pulse of a region, each pixel's final sum goes to
  the output stream instead of back into B3. B3 is cleared at the same time,
  ready for the next region.

## Datapath

```
            +-- Filter (44) ----------------------------------+
            |   R*2ku -> quadrant + angle -> CORDIC -> mux     |
Distance ---+                                                  +- MultC (3) - Accumulator (1) - FIFO - TLAST - out
  (46)      +-- delay 38 -- Sample (6) ------------------------+     x2 (re, im)        x2        x2
                           WBin -> B2 read -> interpolation
```

The numbers are latencies in cycles. From issue to accumulator output takes
46 + 44 + 3 + 1 = 94 cycles. The Sample path runs in parallel with the Filter
path, behind a 38-cycle shift register.

### Distance (`distance`, `pixel_position`, `b1_position_store`, `square_root`)

`pixel_position` holds the loop counters (region, pulse, row, column). It
steps the pixel coordinates by the 0.25 m pixel spacing, starting from an
offset that centres the image on the origin. It also raises a
*sample-memory switch* flag on the last pixel of every pulse. That flag
travels down the pipeline with the item and tells B2 when a pulse is
finished.

B1 holds the platform X and Y positions of all 512 pulses. The platform
height is constant and the image lies at z = 0, so no Z memory is built. The
term z² is a parameter, `Z1`.

R = sqrt(dx² + dy² + Z1) uses 40-bit Q14.25 coordinates and a 78-bit radicand.
The square root is a restoring binary root with one pipeline layer per result
bit (39 layers), and it truncates.

### Sample (`sample`, `wbin`, `b2_sample_store`, `interpolation`)

The range-bin spacing is 1/32 m, so the bin index and weight come from bit
selection, with no multiplier:

- Bin = (R − R0)[33:20]
- W = the 20 fraction bits below that, widened to Q0.25
- W1 = 1 − W, which needs 26 bits so that 1.0 can be represented

B2 reads samples Bin and Bin+1 in the same cycle, one per port of its
true-dual-port memories. The interpolation computes s[Bin]·W1 + s[Bin+1]·W
with truncating 24-bit multiplies.

If Bin + 1 falls outside the pulse, both weights are forced to zero and the
pixel gets no contribution from that pulse.

Sample words are 64 bits wide. The real part is in bits [23:0] and the
imaginary part in bits [55:32], each Q1.22.

### Filter (`filter`, `cordic`)

The phase is computed in *turns* rather than radians. The constant 2ku is
stored in turns per metre (10.6102, Q7.57). Then R·2ku is a number of turns
whose integer part can be thrown away, and the first 64 fraction bits carry
the phase.

- The top two of those bits give the quadrant.
- The remaining 62 bits are multiplied by 2π to give a first-quadrant angle
  (Q1.22).
- A 24-stage CORDIC produces cos and sin of that angle.
- A multiplexer rotates the result into the right quadrant: (cos, sin),
  (−sin, cos), (−cos, −sin) or (sin, −cos).

The CORDIC keeps the interface and 28-cycle latency of the vendor core it
replaces:

- 25-bit input and 24-bit output
- coarse rotation
- truncation

Its error is a few LSBs of Q1.22.

### MultC and Accumulator (`multc`, `accumulator`, `b3_controller`)

MultC is the complex product of sample and filter value. Its four products
are kept at full 48-bit width (Q2.44).

Each accumulator lane adds its 48-bit product to a 64-bit word of B3:

- A strobe one cycle ahead of the product starts the B3 read, so the stored
  value and the product reach the adder together.
- The sum is written back two cycles after the read.
- B3 words of a region are revisited only every 8192 items, so there is no
  read-after-write hazard.
- The B3 controller counts words and pulses. On the last pulse of a region
  (mode 2) it writes zero and sends the sum to the output FIFO.

### Output path and control (`axis_data_fifo`, `fifo_transfer_control`, `system_control`)

The DMA engine cannot pause the accelerator on its own, and results come in
bursts of 8192 words per region. Each lane therefore drains through a
2048-word FIFO that has two flags:

- **Programmable full** (1792 words) halts issue. That leaves room for the
  ~100 items already in the pipeline.
- **Programmable empty** (1024 words) resumes issue.

`fifo_transfer_control` raises TLAST once per region (8192 words), so each
software DMA transfer ends on a packet boundary.

Issue is enabled when all four of these hold:

- *started*: all positions and the first pulse are loaded
- not *halted*
- the samples of the current pulse are fully stored in B2
- not *done*

A valid bit travels with every item, so the pipeline itself never stalls.
Only issue stops.

## Interfaces of `bp_accel_top`

All stream ports are AXI-Stream. The clock is single and the reset is
synchronous and active low.

| Port | Width | Meaning |
|---|---|---|
| `s_axis_pos_*` | 64 | Platform positions, 24.40 fixed point. First all 512 X values, then all 512 Y values. |
| `s_axis_smp_*` | 64 | Range samples, 4096 words per pulse, all 512 pulses, repeated once per region (32 times). |
| `m_axis_re_*`, `m_axis_im_*` | 64 | Image, real and imaginary parts in Q2.44 accumulated over pulses. Region by region, row by row, columns fastest. TLAST every 8192 words. Both channels are expected to be drained by the same DMA. |
| `started`, `halted`, `enable`, `done` | 1 | Status. |

Parameters (all defaults are the full-size design):

- Sizes: `NPIX_X`, `REGION_ROWS`, `NREGIONS`, `NPULSES`, `NSAMPLES`
- FIFO: `FIFO_DEPTH`, `FIFO_PROG_FULL`, `FIFO_PROG_EMPTY`, `TRANSFER_LEN`
- Scene constants: `R0` (9936 m), `TWO_KU`, `Z1` (7071.067² m²), `DXDY`
  (0.25 m)

Types and fixed-point constants are in `bp_pkg`.

## Where this RTL departs from, or fills gaps in, the thesis

- **Vendor cores rewritten as plain RTL:**
  - The vendor CORDIC core is replaced by a hand-written CORDIC with the same
    configuration. Its bit-exact output will differ by a few LSBs.
  - The vendor AXI Data FIFO is replaced by a small first-word-fall-through
    FIFO.
- **FIFO settings:** the FIFO thresholds and the TLAST transfer length are
  not given in the thesis. The values above are choices.
- **Sample word layout:** one table puts the real part in the upper 32 bits.
  The interpolation block diagram slices [23:0] and [55:32]. The block
  diagram is followed.
- **Accumulator width:** one figure shows a 65-bit accumulator, while the
  tables give 64 bits. 64 bits are used.
- **Latency:** the thesis totals the module latencies to 100 cycles. Because
  Sample overlaps Filter, the actual issue-to-output latency here is 94.
- **Sample-ready stall:** the thesis only describes the start condition. This
  design also stops issue whenever the next pulse's samples are not
  completely in B2, so a slow sample stream gives correct results rather than
  silently using stale data.
- **Start flag timing:** the start flag rises when the first pulse is
  complete. The thesis says it rises when the first word of the second pulse
  is written, one cycle later.
- **Out-of-range bins:** these contribute zero.
- **Multiplier precision:** the squaring multipliers are signed 40 × 40
  rather than unsigned 39 × 39. The value is identical.
- **Reset:** synchronous everywhere. The B3 write strobe is gated by reset,
  and all memories start at zero.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- **Unit tests:**
  - The square root is checked against the exact integer floor root.
  - The CORDIC and filter are checked against `$sin`/`$cos` within a
    tolerance.
  - Interpolation, WBin, MultC and the accumulator are checked bit-exactly
    against integer models.
  - The memories, FIFO, TLAST and control blocks are checked against
    behavioural models under random handshakes.
  - Every latency the design fixes (46, 6, 44, 3, and the B3 read/write
    spacing) is checked to the cycle.
- **`tb_bp_accel_top`:**
  - Runs the whole accelerator at 16 × 16 pixels, 4 regions and 4 pulses.
  - Checks every output word against a floating-point back-projection of the
    same scene.
  - Forces and counts each control mechanism: sample-ready stalls, a FIFO
    halt and resume, B2 bank switches, mode-2 outputs and TLAST beats. It
    fails if any of them never happens.
- **`tb_bp_accel_full`:**
  - Runs the default, full-size design through one complete image: 262,144
    pixels, 512 pulses, 4096 samples, 16,384 streamed pulses.
  - Checks all output counts and TLAST positions, and compares three pixels
    per region with the floating-point reference.
  - Needs about 134.3 million cycles and a few minutes of Verilator time.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bp_pkg.sv tb/tb_bp_accel_top.sv \
          --top-module tb_bp_accel_top -y rtl -y tb
./obj_dir/Vtb_bp_accel_top
```

The testbenches generate their stimulus from a hash function and read no
files.

## How far to trust it

- **Logic:** the arithmetic, the schedule and the flow control are simulated
  at full size, against an independent reference.
- **Timing:** the 140 MHz target is not checked here, because no FPGA
  implementation was run. The pipelining follows the thesis's register
  placement, and the wide multipliers (40×64 and 62×64 in the Filter) are
  written as plain products followed by register stages. Synthesis is
  expected to retime those stages into DSP cascades.
- **Image quality:** compared with a double-precision reference, the result
  depends mainly on the CORDIC accuracy and the truncating multipliers. The
  end-to-end tests allow an error of 2 LSBs of Q1.22 per pulse; the
  largest error measured in the reduced-size run is 0.16 LSB per pulse.
