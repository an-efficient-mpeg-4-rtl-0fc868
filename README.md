# Low-power MPEG-4 video codec: system bus, frame memory interface and motion estimation

This is the hardware backbone of an MPEG-4 Simple Profile / H.263 video codec
chip. It encodes and decodes QCIF at 30 frames/s (or CIF at 7.5 frames/s) from
a single 27 MHz clock. The chip pairs a 32-bit RISC with dedicated engines. The
RISC runs bitstream syntax, rate control and sequencing; the engines do the
pixel work. Three ideas keep the power low:

1. **A fixed-time-slot macroblock pipeline.** Every engine has its own small
   local memory and works on a different macroblock (MB) at the same time. The
   frame is cut into slots of 4,500 cycles per encoded MB and 3,600 per
   decoded MB. Since the slots fix when everything happens, the SDRAM needs no
   run-time arbitration between engines.
2. **A buffer-less ("flyby") DMA** in the frame memory interface (FMI). It is
   the only path between the local memories and the external 16 Mbit SDRAM.
   Each word crosses the bus once, straight between the SDRAM and a local
   memory, at one word per clock.
3. **A mixed-mode motion estimator.** It first tries the predicted vector (the
   "skip" check) and runs the 8-PE full search only when that prediction is
   not good enough. A hierarchical search then refines the vector: coarse on
   half-resolution pictures, then integer-pel, then half-pel.

The RTL here covers the pipeline timer, the system bus, the FMI (DMA and SDRAM
controller), both motion estimators and motion compensation, the DCT and
quantisation engine, block reconstruction, the local buffers, and the top that
joins them. Three kinds of part are not in this RTL:

- the RISC core;
- the bitstream engines (VLC/VLD, AC/DC prediction) and the de-blocking
  filter;
- the video and host interfaces.

The top brings out a bus-master port for the RISC and an expansion slave window
for the missing engines' buffers.

## Top level (`mpeg4_codec`)

```
             risc_req/ready/rdata            ext_* (0x8000-0xFFFF)
                    |                                 ^
              +-----v------+   bus_req   +------------+-------------+
   AREQ/LOCK->| bus_arbiter|------------>| bus_decoder (8 slaves)               |
   GRANT <----|            |<--dma_req   +--+-----+-----+-----+-----+-----+-----+
              +------------+              |     |     |     |     |     |
                                       OF_BUF OS_BUF  ME  MEF/MC DCTQ  REC  DMA regs
                                                                               |
   mb_scheduler --(stage strobes)--> ME, MEF/MC, DCTQ, REC   fmi = dma_ctrl + sdram_ctrl --> SDRAM pins
```

The system bus is a single 16-bit bus with two masters, the RISC and the DMA.
A request is a `bus_req_t` struct {valid, write, addr[15:0], wdata[15:0]}.
Writes complete in the request cycle. Reads return data on the next cycle; the
decoder remembers which slave was read and multiplexes its data then.

| Address         | Slave                                         |
|-----------------|-----------------------------------------------|
| 0x4000-0x43FF   | OF_BUF, 1024 x 16                             |
| 0x5000-0x5FFF   | OS_BUF, 4096 x 16                             |
| 0x6000-0x63FF   | mixed motion estimator (`me_mixed`)           |
| 0x6400-0x67FF   | fine estimator / motion compensation (`mef_mc`) |
| 0x6800-0x68FF   | DCT and quantisation engine (`dctq`)          |
| 0x6C00-0x6CFF   | reconstruction engine (`rec`)                 |
| 0x7000-0x700F   | DMA registers                                 |
| 0x8000-0xFFFF   | expansion port (`ext_sel/ext_req/ext_rdata`)  |

The RISC's 32 kB code and data memory (16K x 16) sits on its own port
(`cdm_req/cdm_rdata`), not on the system bus.

## Macroblock pipeline timing (`mb_scheduler`)

One frame period is 900,000 cycles (27 MHz / 30). It is laid out as follows:

- Cycle 0: `vsync` and the encoding frame start. Then 105 encoding slots of
  4,500 cycles follow (472,500 cycles).
- Cycle 472,500: the decoding frame start. Then 118 decoding slots of 3,600
  cycles follow (ending at 897,300).

The encoder is a four-stage pipeline (MEC; MEF/MC; DCTQ/IDCTQ; REC/SP). The
decoder has three stages (VLD; MC with IQ/IDCT; REC/DB). In slot k, stage s
works on MB k−s. `enc_stage_start[s]` pulses at the slot start whenever that MB
exists (0 ≤ k−s < 99), and `enc_stage_mb[s]` gives its number. The decoder
outputs work the same way. All strobes are registered and come one cycle after
the counter reaches the slot boundary. Slots with no MB in a stage are left to
the firmware.

Inside the top:

- encoder stage 0 starts the mixed motion estimator;
- encoder stage 1 starts the fine search plus compensation;
- encoder stage 2 starts one DCT/Q encoding block;
- encoder stage 3 and decoder stage 2 start one reconstruction block;
- decoder stage 1 starts compensation alone and one DCT/Q decoding block.

The DCT/Q and reconstruction engines do one 8x8 block per start. The firmware
starts the other five blocks of an MB through their control registers.

CIF at 7.5 frames/s uses the same module with other parameters:
`FRAME_CYCLES=3_600_000`, `ENC_SLOTS=DEC_SLOTS=400`, `DEC_OFFSET=1_800_000`,
`MB_PER_FRAME=396`. The slot and MB counters are 9 bits wide, so that setting
needs no code change.

## Frame memory interface

### Flyby DMA (`dma_ctrl`, `dma_agen`)

A conventional DMA reads a word into its own buffer and writes it out again:
two bus transactions and a register per word. This one has no data buffer.

**Programming.** The RISC writes these registers:

| Offset | Register                                   |
|--------|--------------------------------------------|
| 0      | CTRL                                       |
| 1, 2   | SDRAM word address, low and high halves    |
| 3      | local bus address                          |
| 4      | LEN                                        |
| 5      | PCOUNT                                     |
| 6      | SDRAM stride                               |
| 7      | CLEAR                                      |
| 8      | local stride                               |

A CTRL write starts the transfer:

- bit 0 = start;
- bit 1 = direction (0 = SDRAM → local, 1 = local → SDRAM);
- bit 2 = packet mode.

Reading CTRL returns busy (bit 0) and done (bit 3).

**Control sequence.** IDLE → LOAD → REQ → XFER → DONE.

- LOAD copies the registers into the two address walkers: SASM for the source
  and DASM for the destination.
- REQ raises AREQ and waits for GRANT. The arbiter grants on the next edge and
  stalls the RISC (`risc_ready` low) while the DMA owns the bus.
- XFER holds LOCK while words move.
- DONE drops LOCK and AREQ, sets the done flag and pulses `dma_irq`.

**SDRAM → local.** Read commands stream into the SDRAM controller as fast as it
accepts them. Each word it returns (`rd_valid`) is written onto the bus in that
same cycle, to the address DASM supplies. The SDRAM's read pipeline is the only
storage.

**Local → SDRAM.** This direction is the subtle one. Local memories return read
data one cycle after the address. The DMA presents the bus read of word n+1 in
the cycle that hands word n, now in the memory's output register, to the SDRAM
controller. If the controller stalls (a row change or a refresh), the DMA
presents the same address again rather than the next one. The memory's output
register therefore always holds the word still owed, so nothing needs to be
stored. In code, the bus address is `fire ? sasm_next : sasm_addr`.

**Modes.**

- Block mode moves LEN contiguous words.
- Packet mode moves PCOUNT packets of LEN words. The SDRAM address jumps by
  the SDRAM stride after each packet, and the local address by the local
  stride.

Packet mode cuts a rectangle out of a frame stored line by line. It lays the
rectangle into a row-aligned local memory in one go. An example is the 24-line
reference window of the motion estimator.

**Measured throughput.**

| Transfer                                  | Words | Cycles |
|-------------------------------------------|-------|--------|
| inside one SDRAM row                      | 200   | 213    |
| 24 rows × 12 words, packet mode           | 288   | 317    |
| 8x8 block out of a frame, packet mode     | 32    | 78     |

Each figure includes the programming-to-done overhead and the refreshes that
fall inside.

### SDRAM controller (`sdram_ctrl`)

The controller drives a 16 Mbit part: 2 banks × 2,048 rows × 256 columns × 16
bits, on the system clock. It takes a 20-bit word address and splits it into
row [19:9], bank [8] and column [7:0]. Its parts are:

- **Power-up.** It waits `INIT_WAIT` (5,400 cycles = 200 µs), then issues
  precharge-all, two auto-refreshes and the mode register set (burst length 1,
  CAS latency `CL`). `init_done` is set by the mode register set.
- **Refresh.** A counter requests a refresh every `REF_INTERVAL` = 420 cycles
  (64 ms / 4,096 rows at 27 MHz). The controller finishes the access in
  progress, closes all rows and refreshes.
- **Open-row policy.** Each bank keeps its last row open. A request that hits
  the open row is accepted at once (`req_ready` is combinational). A miss first
  precharges and then activates. Back-to-back hits stream one word per clock as
  burst-length-1 READ/WRITE commands.
- **Pins.** The command, address and write data go out through registers. Read
  data is captured in a register and returned on `rd_valid`/`rd_data`, CL+2
  cycles after the request was accepted, in order.
- **Bus turnaround.** A write is not accepted while read data is still in
  flight, so the data bus never has two drivers.

The data pins are split into `sd_dq_out`, `sd_dq_oe` and `sd_dq_in`, for an
external tri-state pad. All timings are parameters in cycles: `T_RCD`, `T_RP`,
`T_RFC`, `T_MRD` and `T_WR`, with defaults for a 37 ns clock.

`fmi` joins the two halves and brings out the bus ports and the SDRAM pins.

## Motion estimation

### Mixed coarse/skip estimator (`me_mixed`, `me_skip`, `me_coarse`, `me_pe`)

The estimator works on half-resolution pictures. It compares an 8x8 current
block against a 24x24 reference window, with range −8..+7 in both directions;
vector (0,0) is window position (8,8). Its bus map:

| Offset          | Contents                                       |
|-----------------|------------------------------------------------|
| 0x000 + row*4   | current block, 2 pixels per word (low byte = left pixel) |
| 0x200 + row*16  | window, 12 words per row                       |
| 0x040-0x047     | registers                                      |

The registers are: control, predicted vector, threshold, result vector, SAD,
status, and counters of blocks and of skips.

One estimation runs in two steps:

1. **Skip check (`me_skip`).** It computes the SAD at the predicted vector, one
   row per cycle. If that SAD is below the threshold register, the prediction
   is taken as is. `done` then comes 12 cycles after start, and the full
   search never switches on.
2. **Coarse search (`me_coarse`).** Otherwise it runs a full search with eight
   processing elements. For one vertical offset and a group of eight
   horizontal offsets, the current pixel is broadcast each cycle to all eight
   PEs. PE k gets the window pixel displaced by k, so one reference read
   fetches eight neighbouring pixels. A group takes 64 + 1 cycles. The 32
   groups take 2,080 cycles. The compare step keeps the first smallest SAD in
   scan order. `done` comes 2,093 cycles after start.

The two counters give the share of searches that were skipped.

### Fine estimation and motion compensation (`mef_mc`)

The fine engine works on full-resolution 16x16 MBs:

| Offset          | Contents                                       |
|-----------------|------------------------------------------------|
| 0x000 + row*16  | 20x20 reference patch (10 words per row)       |
| 0x180 + row*8   | current MB                                     |
| 0x200-0x206     | registers                                      |
| 0x300 + row*8   | prediction (read only)                         |
| 0x380 + row*4   | half-resolution block (read only)              |

The firmware cuts the patch so that patch pixel (2,2) is the MB position moved
by twice the coarse vector. A run then does the following:

1. **Integer-pel step.** The 9 offsets within ±1 pixel, 16 cycles each.
2. **Half-pel step.** The 8 half-pel neighbours of the best integer offset,
   with bilinear interpolation rounded as MPEG-4 does with rounding control 0:
   (a+b+1)/2 and (a+b+c+d+2)/4. A neighbour wins only with a strictly smaller
   SAD.
3. **Compensation.** The prediction MB at the chosen offset.
4. **Decimation.** The current MB, decimated 2:1 by rounded 2x2 averages,
   which is the data the coarse estimator needs.

The result vector is in half-pel units: 4 × coarse + offset. A full run takes
298 cycles. Compensation-only mode (decoding) takes 26 cycles and uses the
offset register in place of the search.

## DCT and quantisation (`dctq`)

The engine transforms one 8x8 block per run:

| Offset          | Contents                                       |
|-----------------|------------------------------------------------|
| 0x000 + row*8   | input block, signed 16-bit samples             |
| 0x040 + row*8   | quantised levels (written by an encoding run, or by the firmware before a decoding run) |
| 0x080 + row*8   | reconstructed block (read only)                |
| 0x0C0           | control: bit0 start, bit1 intra, bit2 decoding run |
| 0x0C1           | QP, 1..31                                      |
| 0x0C2           | status: bit0 busy                              |

The input samples are pixels for intra blocks and prediction errors for inter
blocks.

**Transform.** The 2-D DCT is done as a row pass then a column pass. Eight
multipliers produce one 8-point output per cycle, so a pass takes 64 cycles.
The basis is C[k][n] = round(4096 · c(k) · cos((2n+1)kπ/16)), with
c(0) = 1/√8 and c(k) = ½ otherwise. The row pass keeps three fraction bits;
the column pass rounds them away. The result stays within 1 of a
floating-point DCT, and the same holds for the IDCT.

**Quantiser.** It follows H.263:

- intra DC: level = (coef + 4) / 8, clipped to 1..254;
- intra AC: level = |coef| / 2QP;
- inter: level = (|coef| − QP/2) / 2QP.

The sign is then restored and levels are clipped to ±127. The division uses
a reciprocal table with one correction step, so it is exact.

**Inverse quantiser.**

- Intra DC: 8 · level.
- Otherwise: |rec| = QP · (2|level| + 1), minus 1 when QP is even, clipped to
  −2048..2047.

**Runs.** An encoding run does DCT, then Q and IQ during the column pass, then
IDCT. It takes 258 cycles, and its reconstruction is exactly what a decoder
rebuilds. A decoding run does IQ and then IDCT, in 194 cycles. Six blocks of
an MB take about 1,550 cycles of a 4,500-cycle slot.

## Reconstruction (`rec`)

The reconstruction engine rebuilds one 8x8 block. It adds the decoded
residual (signed, from the DCT/Q engine) to the motion-compensated prediction
(from the MEF/MC engine) and clips the sum to 0..255. Intra blocks ignore the
prediction. It handles one row per cycle, and `done` comes 9 cycles after
start. The status register also reports how many pixels were clipped.

| Offset          | Contents                                                   |
|-----------------|------------------------------------------------------------|
| 0x000 + row*4   | prediction, 2 pixels per word                              |
| 0x040 + row*8   | residual, signed 16-bit                                    |
| 0x080 + row*4   | result (read only)                                         |
| 0x0C0           | control: bit0 start, bit1 intra                            |
| 0x0C1           | status: bit0 busy, bits 15:8 clipped pixels of the last block |

The same engine serves the encoder (rebuilding the reference picture) and the
decoder. The decoder's de-blocking filter along the 8x8 block edges is not
part of this RTL.

## Where this design departs from the original chip

- **One bus.** Data and registers share one 16-bit bus; there is no separate
  8-bit peripheral bus.
- **Own choices where the original says nothing:** the address map, the DMA
  register layout, the strides of packet mode, the SDRAM address split,
  burst length 1, the open-row policy and all SDRAM timing values.
- **Buffer sizes.** OF_BUF and OS_BUF are 1,024 and 4,096 words. Together with
  the engines' memories, the built local memory is about 12.4 kB, more than
  the 9.53 kB the original quotes for its (larger) set of engines.
- **Skip criterion.** The skip test is "SAD at the predicted vector below a
  threshold". The original names the skip decision but not its rule.
- **Search range.** The −8..+7 range is applied on the half-resolution
  pictures.
- **Fine search pattern.** The fine steps search ±1 integer pixel and then
  ±½ pixel. Only luminance 16x16 prediction is built: no four-vector mode, no
  chroma.
- **Quantiser.** Only the H.263 quantiser is built; the MPEG-4 matrix
  quantiser is not.
- **Decoding slot start.** The decoding slots start right at the decoding
  frame start.
- **RISC memory.** The code and data memory is 16-bit wide on its own port.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench          | What it checks |
|--------------------|----------------|
| `tb_sdram_ctrl`    | power-up sequence, refresh spacing, row hits/misses and read latency, against a behavioural SDRAM model (`tb/sdram_model.sv`, which flags protocol and timing errors) |
| `tb_dma_ctrl`      | both directions, block and packet mode, random grant delays and SDRAM-side stalls, one word per clock when nothing stalls |
| `tb_fmi`           | DMA + SDRAM controller + model: transfers across row boundaries, packet mode both ways, refreshes inside transfers, data integrity and cycle counts |
| `tb_bus_arbiter`, `tb_bus_decoder`, `tb_local_mem` | randomised protocol checks |
| `tb_mb_scheduler`  | every strobe of two QCIF frames, and one CIF frame on a second instance |
| `tb_me_skip`, `tb_me_coarse`, `tb_me_mixed` | results against an exhaustive search in the testbench, with exact cycle counts |
| `tb_mef_mc`        | vector, SAD, every prediction pixel and every half-resolution pixel against a model of the same two-step search |
| `tb_dctq`          | levels and reconstruction against an integer model, fixed-point precision against floating-point DCT/IDCT, decoding runs, cycle counts, at QP 1..31 |
| `tb_rec`           | every pixel against prediction + residual clipped, clip count, intra blocks, cycle count |
| `tb_mpeg4_codec`   | the whole top at its default size, for one full 900,000-cycle frame |

The top-level run drives the RISC port and an SDRAM model. The RISC stores a
window and a block to SDRAM through the DMA, and its own reads stall meanwhile.
The DMA then loads both into the estimator. The run lets the scheduler fire
every stage. That gives 99 coarse estimations in normal and skip mode, 99
fine searches, 99 decoder compensations, and 99 DCT/Q and 99 reconstruction
blocks each way. All are checked against expected results and against their
slot times. At the end, the decoder's reconstruction of the encoder's levels
must equal the encoder's own. The fine estimator's prediction plus that
residual then goes through the reconstruction engine and is checked pixel by
pixel. It counts that each mechanism happened:

- both DMA directions;
- block and packet mode;
- RISC stalls;
- SDRAM refresh and row misses;
- skip and normal estimation;
- fine search and compensation only;
- DCT/Q encoding and decoding blocks;
- reconstruction in both pipelines;
- every encoder and decoder stage.

Simulate any testbench with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/codec_pkg.sv tb/tb_mpeg4_codec.sv --top-module tb_mpeg4_codec
./obj_dir/Vtb_mpeg4_codec
```

Replace the top-module name for the other testbenches. The full-frame top run
takes a few seconds.

## Files

- `rtl/codec_pkg.sv`: bus struct, address map, register offsets, SDRAM widths.
- `rtl/mpeg4_codec.sv`: top level.
- `rtl/mb_scheduler.sv`: pipeline timer.
- `rtl/bus_arbiter.sv`, `rtl/bus_decoder.sv`: system bus.
- `rtl/local_mem.sv`: local buffers and the code/data memory.
- `rtl/fmi.sv`, `rtl/dma_ctrl.sv`, `rtl/dma_agen.sv`, `rtl/sdram_ctrl.sv`:
  frame memory interface.
- `rtl/me_mixed.sv`, `rtl/me_skip.sv`, `rtl/me_coarse.sv`, `rtl/me_pe.sv`:
  mixed estimator.
- `rtl/mef_mc.sv`: fine estimator and motion compensation.
- `rtl/dctq.sv`: DCT, quantisation, inverse quantisation and IDCT.
- `rtl/rec.sv`: block reconstruction.
- `tb/`: one testbench per module, plus the SDRAM model.
