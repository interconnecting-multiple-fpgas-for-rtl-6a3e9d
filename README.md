# VGG16 inference split across two FPGAs

The convolutional part of VGG16 has about 14.7 million 8-bit weights. That is
too many to keep in the block RAM of one cloud FPGA next to the buffers the
pipeline needs. This design cuts the network after the fourth max-pooling
layer:

- **FPGA #1** runs blocks 1–4 (10 convolutions, 7.6 M weights).
- **FPGA #2** runs block 5 (3 convolutions, 7.1 M weights).

Only the 14×14×512 pool4 map crosses between the devices. That is 100,352
bytes per frame. The FPGAs sit on a PCIe bus and already expose a host DMA
window. So the first FPGA does not get a custom link: it writes the map into
the second FPGA's DMA window with ordinary AXI4 bursts. The second FPGA sees
the same kind of transfer it would get from the host and needs no special
receive logic. The fully connected layers and the softmax stay on the host
CPU.

Everything is SystemVerilog-2017 and synthesizable. The top-level defaults
are the full network: 224×224×3 input and 64/128/256/512/512 channels.

## Dataflow

```
 host --AXI4 512b--> [dma_core] --512b--> [width_converter 64->3] --24b-->
 [width_converter 3->1] --8b--> [input_quantize] --> [vgg_block 1] --> ... --> [vgg_block 4]
 --8b--> [width_converter 1->3] --> [width_converter 3->64] --512b--> [inter_fpga_tx]
                                                                              |
                                              AXI4 write bursts to PTR        v
 FPGA #2: [dma_core] --> 64->3 --> 3->1 --> [vgg_block 5] --> 1->3 --> 3->64 --> dma_core RX FIFO
                                                                              |
 host <--AXI4 512b read bursts------------------------------------------------+
```

The ports of the top, `vgg16_multi_fpga_top`, are grouped as follows:

- `h1_*`: the host's full AXI4 port into FPGA #1.
- `h2_ar*`/`h2_r*`: the host's read port on FPGA #2. Its write port is driven by FPGA #1.
- `d1_*`, `t1_*`, `d2_*`: three AXI4-Lite register ports, for FPGA #1's DMA core, FPGA #1's transmitter and FPGA #2's DMA core.
- `load1`, `load2`: the two parameter-load buses.

In the real system the vendor PCIe/XDMA shell and the PCIe switch sit where
these ports are. They are not part of this RTL.

### Stream format

Inside the accelerator every stream carries one signed int8 sample per beat,
with valid/ready/last. The order is channel-fastest, then column, then row
(HWC). The 24-bit bus carries three samples per beat. In the input image one
beat is one RGB pixel.

The width converters are byte gearboxes. Byte 0 is the least significant
byte of a word. `keep` is a byte count, not a strobe mask. A partial final
word is flushed when TLAST arrives. The 512-bit words of the feature maps are
therefore the HWC byte stream cut into 64-byte pieces.

## Host protocol

This is one frame, as `tb_vgg16_multi_fpga_top` drives it:

1. On FPGA #2's DMA core, write `TX_LEN = 1568`. This is the length of the pool4 map in 512-bit words.
2. On FPGA #1's transmitter, write `PTR_HI`/`PTR_LO` with FPGA #2's window address, then `BURST_LEN`, then `TX_LEN = 1568`. Writing `TX_LEN` sets `STATUS[0]` (running).
3. Write the image, 2,352 words, into FPGA #1's window with AXI4 write bursts. Write that core's `TX_LEN` before or after the data.
4. Read 392 words (the 7×7×512 pool5 map) from FPGA #2's window. A read beat waits until its word is there. `FLAGS[0]` then reads 1; write 0 to it before the next frame.

### DMA core registers (`dma_core`)

| offset | name | access | behaviour |
|---|---|---|---|
| 0x00 | RX_FIFO | RO | receive FIFO occupancy in words |
| 0x04 | TX_FIFO | RO | transmit FIFO occupancy in words |
| 0x08 | FLAGS | R/W | bit 0: a TLAST word entered the receive FIFO. Further receive data is refused until software writes 0 |
| 0x0C | TX_LEN | WO | packet length in words. The word that completes it leaves with TLAST, then TX_LEN clears |
| 0x10 | RESET | WO | a non-zero write pulses the user reset for 16 cycles. The register then reads 0 |
| 0x14 | SIGNATURE | RO | 0x62696E67 |

The core does not know where a packet ends until `TX_LEN` is written. Until
then it holds back the newest word in the transmit FIFO, because that word
might be the last one and must carry TLAST. Write addresses are ignored:
every write burst appends to the transmit FIFO. Every read burst pops the
receive FIFO.

### Inter-FPGA transmitter registers (`inter_fpga_tx`)

| offset | name | access | behaviour |
|---|---|---|---|
| 0x00 | PTR_HI | R/W | target address bits 63:32 |
| 0x04 | PTR_LO | R/W | target address bits 31:0 |
| 0x08 | TX_LEN | WO | words to send. Writing it starts the transmitter |
| 0x0C | TX_FIFO | RO | FIFO occupancy in words |
| 0x10 | BURST_LEN | R/W | beats per burst, 1..64, reset value 16 |
| 0x14 | STATUS | RO | bit 0: running |
| 0x18 | SIGNATURE | RO | 0x464D4C43 |

While it runs, the transmitter starts a burst only once its FIFO holds the
whole burst. That is `BURST_LEN` words, or the remaining words for a shorter
final burst. So a burst never holds the shared bus while waiting for data.
Every burst goes to `PTR` with INCR and 64-byte beats. One burst is
outstanding at a time; the transmitter waits for its write response before
the next. Running ends when `TX_LEN` words are acknowledged.

## The convolution engine (`conv2d_layer`)

Each of the 13 layers is its own hardware instance. All layers run
concurrently as a pipeline.

**Line buffer.** A layer keeps four input rows of `W×CIN` samples. Row `r`
lives in slot `r mod 4`. Input is accepted while fewer than `y+3` rows have
arrived, where `y` is the output row being computed. So the rows `y-1..y+1`
in use are never overwritten.

**Window.** For each output pixel a 3×3×CIN window register is filled by
shifting in one 3×CIN column at a time. Rows and columns outside the image
read as zero, which gives same padding. A row start takes two shifts; every
further pixel takes one.

**MAC.** `LANES` multipliers take one chunk of `LANES` window samples against
the matching weights and sum them in one cycle. An output channel takes
`NCH = 9·CIN/LANES` cycles, so one pixel takes `COUT·NCH` cycles. After the
last chunk the bias is added and the 32-bit sum goes to the requantizer. A
four-entry output FIFO decouples the layer from the next one. A result is
only started when it is sure to fit in that FIFO.

**Schedule.** Lanes are chosen as `LANES = 9·CIN/r`, with `r` = 1, 2, 4, 8
for blocks 1–4 and 32 for block 5. Every layer then needs about `W·H·64`
cycles per frame:

- Block 1: 27 and 576 lanes.
- Blocks 2–4: 288 and 576 lanes.
- Block 5: 144 lanes.

The layers are balanced, and the input side (one RGB pixel every 64 cycles)
is far below what the 24-bit bus could deliver. At 125 MHz this is roughly
3.2 M cycles, or about 39 frames per second. The whole design has 4,779
multipliers. That is the number to change if a device has fewer DSPs. Any
`r` that divides `9·CIN` works. `vgg_pkg::block_lane_div` holds the table.

**Requantization (`quantizer`).** The real scale `M = S_in·S_w/S_out` is
stored as a 32-bit integer `M0` and a shift `n`, with `M = M0·2^-n`. The
result is computed as follows:

```
q = clamp( ((acc · M0) + 2^(n-1)) >>> n  + zp_out ,  lo, 127 )
```

Here `>>>` is an arithmetic shift. `lo` is `zp_out` when ReLU is fused, as in
every convolution, and −128 otherwise. Adding one half and truncating
rounds half up. That is cheaper than round-half-to-even and agrees with it
except on exact ties. Only 8-bit weights and 32-bit biases are stored.

**Input quantizer.** `input_quantize` maps the uint8 image to int8 with the
same unit, ReLU off. Its default constants give `x − 128`.

**Max pooling (`maxpool2d`).** Pooling keeps a half-row of running maxima.
It emits one 2×2 maximum per channel on every second row.

## Loading parameters

Weights, biases and requantization constants are written over a load bus,
`vgg_pkg::load_bus_t`, with the fields `{en, layer, kind, addr, data}`. Each
layer picks out its own id:

- Convolutions are ids 0–12 in network order.
- The input quantizer is id 13.
- FPGA #1 listens to ids 0–9 and 13. FPGA #2 listens to ids 10–12.

The `kind` values are:

- `LOAD_WEIGHT`: `addr` is the flat index into `w[co][ky][kx][ci]`. The layer stores it in weight row `addr / LANES`, lane `addr % LANES`.
- `LOAD_BIAS`: `addr` is the output channel.
- `LOAD_QUANT`: `addr` 0 = M0, 1 = n, 2 = output zero point.

Weights and biases have no reset. The requantization constants reset to
`M = 1`, zero point 0. The user reset from the DMA core resets them too, so
software reloads them after using `RESET`.

## Where this differs from a deployed system

- The XDMA/PCIe shell, the PCIe fabric and the host driver are not included. FPGA #1's transmitter is wired straight to FPGA #2's AXI4 slave.
- The convolution schedule, lane counts, FIFO depths (64 words in the DMA core and transmitter), the 16-cycle reset pulse and the load bus are this design's own. The register maps and the burst and hold-back rules follow the reference system.
- Weights are held in plain arrays (`wmem`) that a synthesis tool maps to block RAM. Whether 7.6 M bytes fit one device next to the line buffers is a floor-planning question this RTL does not answer.
- The receive FIFO of FPGA #1's DMA core is present but unused.

## Simulation

Every block has a self-checking testbench in `tb/`, with reference models in
`tb/vgg_ref_pkg.sv`. These are plain loops for convolution with
requantization, for pooling and for rounding. Each testbench prints
`TB_RESULT checks=N failures=M`. Build one with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_vgg16_multi_fpga_top \
  rtl/vgg_pkg.sv tb/vgg_ref_pkg.sv rtl/*.sv tb/tb_vgg16_multi_fpga_top.sv
./obj_dir/Vtb_vgg16_multi_fpga_top
```

The testbenches are:

- `tb_vgg16_multi_fpga_top`: the whole system at 32×32 input with 4 base channels, three frames. It counts that each mechanism happens:
  - the held-back last word;
  - the transmitter waiting for a full burst;
  - full and short peer bursts;
  - accelerator back-pressure;
  - a host read waiting on an empty FIFO;
  - FLAGS;
  - the user reset.
- `tb_fpga1_accel`, `tb_fpga2_accel`: each FPGA alone. The testbench plays the other FPGA and the host.
- `tb_vgg_block`, `tb_conv2d_layer`, `tb_maxpool2d`, `tb_quantizer`, `tb_input_quantize`, `tb_dma_core`, `tb_inter_fpga_tx`, `tb_axil_regs`, `tb_axis_fifo`, `tb_width_converter`: the building blocks. `tb_conv2d_layer` also checks the cycle count of a frame against `W·H·COUT·NCH`.

The largest sizes simulated end to end are the whole system at 32×32 input with
4 base channels and FPGA #2 alone at 64×64 with 4 base channels. A run at the
default sizes has to load all 14.7 M weights one per cycle before its first
frame, which is about 15 M cycles. With Verilator that takes well over ten
minutes, so no default-size testbench is part of the set.

Simulation has two states. Everything that is read is reset or initialised,
and the testbenches pass with random initial values.
