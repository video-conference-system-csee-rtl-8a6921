# Split-screen video conference board: capture, frame buffers and display

Two FPGA boards, each with a composite-video camera and a VGA monitor, are
joined by Ethernet. Each board shows a split screen: its own camera on the
left half and the other board's camera on the right half. To keep the video
small enough to send both ways over the network, each camera frame is reduced
to 320 x 480 pixels of 4-bit gray: chrominance is thrown away, every second
luminance sample of a line is dropped, and only the top 4 bits of the
remaining sample are kept. A frame is then 614,400 bits (38,400 16-bit
words), and at 15 frames/s the two directions together need about 18.4 Mbit/s.

This RTL is the hardware of one board: everything between the video decoder
chip, the SRAM chip, the VGA DAC and a soft processor. The processor itself,
the Ethernet controller, the SDRAM controller and the JTAG UART are existing
components; they meet this design at bus ports on the top level.

```
 ADV7181 --Y, VS, FIELD--> video_controller --(line buffer, 80 words)
 (27 MHz)                        |                                 \
                                 |   Avalon bus (avalon_fabric)     processor copies
 processor port ================+====+=========+======== Ethernet,  each line
                                      |         |         JTAG UART,  into SRAM
                               sram_controller  vga_controller  SDRAM ports
                                 |    ^  display port  |
                               SRAM   +----------------+--> R,G,B (10-bit), HS, VS
```

## How a camera line reaches the screen

1. **Capture (decoder clock).** The decoder runs in 16-bit mode; only its
   8-bit luminance port is used. `video_controller` watches that port for the
   BT.656 timing codes `FF 00 00 XY`. Bit 4 of `XY` separates start of active
   video (SAV) from end (EAV); bit 5 marks vertical-blanking lines, which are
   ignored. A rising edge of the VS pin starts a field and the FIELD pin says
   which one; a field-0 VS starts a frame. Active line *n* of field *f* is
   frame line 2*n*+*f*.
2. **Decimation and packing.** After SAV every second sample is kept
   (`DECIMATE` = 2), its top 4 bits form the pixel, and four pixels are
   packed into one 16-bit word, leftmost pixel in bits [3:0]. A line of 640
   samples gives 320 pixels = 80 words, written to the on-chip `line_buffer`.
3. **Hand-off.** At EAV the buffer is marked *full* and the frame line number
   is latched. The processor polls STATUS, reads LINE and the 80 words, writes
   them to SRAM at `LOCAL_BASE + 80*line`, and writes ACK to release the
   buffer.
4. **Display (pixel clock).** `vga_controller` reads the local buffer for
   columns 0-319 and the network buffer (`REMOTE_BASE`, filled by the
   processor from received packets) for columns 320-639, one SRAM word per
   four pixels, and drives the same gray level on R, G and B.

## The line-buffer handshake

This is the part that needs the most care, because the buffer is written at
the decoder's 27 MHz and read by the processor at the 25 MHz system clock,
and there is only one buffer.

- The *full* state is the XOR of two toggles: `done` (decoder side, flips at
  EAV of a stored line) and `ack` (system side, flips on a write to ACK while
  full). Each toggle crosses to the other domain through a two-flop
  synchroniser. Each side computes *full* from its own toggle and the
  synchronised copy of the other one, so the processor sees *full* two or
  three system clocks after EAV, and the capture side sees it cleared two or
  three decoder clocks after ACK.
- While *full*, the buffer and the latched line number do not change, so the
  processor reads them directly without further synchronisation.
- A line whose SAV arrives while the buffer is still full is not written at
  all: it is dropped and counted in `lines_dropped_o`. The buffer is never
  overwritten while the processor may be reading it (an assertion checks
  this).
- A line is 63.6 us. Copying 80 words over the bus takes a few microseconds:
  in the full-size simulation it took at most 164 bus cycles (6.6 us), with
  a processor model that issues one access per cycle. The SRAM side alone
  needs 80 cycles. So with a processor that polls promptly and copies within
  the line time, no line is lost and one buffer is enough.

**Frame admission.** CONTROL bit 0 ("frame buffer ready") is sampled at the
start of each frame. If it is clear, the whole frame is skipped and counted
in `frames_dropped_o`. This lets software drop frames to stay in step with
the network: for example, capture a new local frame only after the last
remote frame has been shown. The VGA FRAMES counter shows when that has
happened.

## SRAM access

`sram_controller` drives a 256K x 16 asynchronous SRAM (IS61LV25616 type)
with one access per 25 MHz clock.

- **Ports.** The display read port always wins. A processor access in the
  same cycle gets `waitrequest`. During active video the display takes one
  cycle in four, so the processor keeps at least 75% of the bandwidth.
- **Timing.** An access accepted in cycle *t* is put on the pins from
  registers during cycle *t*+1. Read data are sampled at the end of *t*+1
  and delivered in cycle *t*+2. Both ports therefore see a fixed read
  latency of 2, and `vga_controller` relies on it (parameter `RD_LAT`, with
  an assertion).
- **Reads** are address-controlled: CE and OE are low and the address is
  held for the whole 40 ns cycle.
- **Writes** are WE-controlled. WE is low only in the second half of the
  cycle: `WE_n = !(write & !clk & rst_n)`. The address is therefore set up
  half a cycle before WE falls, and WE rises on the clock edge where the
  address may change, so back-to-back writes run at one word per clock. OE
  stays high during writes, so the SRAM and the controller never drive the
  data bus at the same time. UB/LB come from the bus byte enables. This WE
  pulse is the one place where the clock is used as data; on a real board,
  check it against the SRAM data sheet's tWP, tSA and tHA.
- **Data bus.** The bidirectional bus appears as `sram_dq_o`, `sram_dq_i`
  and `sram_dq_oe_o`; the tri-state pad is left to the chip top.

## Display

- **Timing.** Standard 640x480 at 60 Hz: 25 MHz clock, 800 x 525 clocks,
  front porch / sync / back porch of 16/96/48 clocks and 10/2/33 lines,
  negative syncs.
- **Fetch pipeline.** On every fourth active column the controller requests
  the word holding the next four pixels. The word arrives `RD_LAT` cycles
  later and is shifted out one nibble per clock. Sync and blank go through
  the same delay, so all outputs leave registers together, `RD_LAT`+1 clocks
  after the counters.
- **Pixel widening (`pixel_scaler`).** The default is *bit staggering*:
  each input bit, most significant first, is followed by a 0, so 1101
  becomes 1010_0010. For the 10-bit DAC two more zeros are appended. Note
  that staggering does not reach full brightness: 1111 becomes 1010_1010,
  about 2/3 of full scale. Setting the `REPLICATE` parameter repeats the
  nibble instead (1101 -> 1101_1101...), which maps white to full scale.
- **Ready bits.** A half stays black until the processor sets its ready bit
  (VGA CONTROL bit 0 for the local half, bit 1 for the remote half).

## Bus and registers

`avalon_fabric` connects one master (the processor) to six slaves by address
window. Addresses are 16-bit word addresses. A request goes only to the
slave whose window holds the address, with the address made relative to the
window base, and that slave's `waitrequest` stalls the master. Only one read
may be outstanding; a second read waits for the first one's data. An access
outside every window completes at once, and a read there returns 0.

| Window (word address) | Slave | Contents |
|---|---|---|
| 000000h-03FFFFh | SRAM | local frame at 00000h, network frame at 10000h, 80 words per line |
| 040000h-0400FFh | video controller | 00h-4Fh line buffer (read); 80h STATUS bit0 full; 81h LINE; 82h CONTROL bit0 frame buffer ready; 83h ACK (write) |
| 040100h-04010Fh | VGA controller | 0h CONTROL bit0 local ready, bit1 remote ready; 1h FRAMES (read) |
| 040200h-04020Fh | Ethernet controller (port `eth_*`) | |
| 040210h-040217h | JTAG UART (port `jtag_*`) | |
| 400000h-7FFFFFh | SDRAM (port `sdram_*`) | program memory |

The bus request and response are the packed structs `av_req_t` and
`av_rsp_t` defined in `vcs_pkg`.

**Software loop.** The processor has two jobs. The first:

1. Wait until STATUS bit 0 is set.
2. Read LINE and the 80 buffer words.
3. Write the words to SRAM at `80*LINE`.
4. Write ACK.

The second is to store frames received from the network at `10000h` and to
send local frames out.

## Files

| File | Contents |
|---|---|
| `rtl/vcs_pkg.sv` | frame format, SRAM layout, bus structs, address map, register offsets |
| `rtl/vcs_top.sv` | one board: all blocks wired together |
| `rtl/video_controller.sv` | capture, decimation, packing, handshake, frame/line drop |
| `rtl/line_buffer.sv` | 80 x 16 dual-clock line memory |
| `rtl/sync_2ff.sv` | two-flop synchroniser |
| `rtl/sram_controller.sv` | SRAM timing, display/processor arbitration |
| `rtl/vga_controller.sv` | VGA timing, split-screen fetch, ready gating |
| `rtl/pixel_scaler.sv` | 4-to-M-bit widening (staggering / replication) |
| `rtl/avalon_fabric.sv` | address decoding bus |
| `tb/adv7181_model.sv` | decoder luminance-port model (BT.656 codes, VS, FIELD, interlace) |
| `tb/is61lv25616_model.sv` | asynchronous SRAM model |
| `tb/tb_video_pkg.sv` | the test picture shared by model and testbenches |
| `tb/tb_*.sv` | one self-checking testbench per block, `tb_vcs_top` end to end |

## Parameters

- `vcs_top`: `DECIMATE` (2) and `REPLICATE` (0).
- `video_controller`: `DECIMATE`, `LINE_PIX` (320) and `LINES` (480).
- `vga_controller`:
  - the timing numbers;
  - the buffer bases `L_BASE` and `R_BASE`;
  - `RD_LAT`, which must equal the SRAM controller's latency of 2;
  - `REPLICATE`.
- Frame format and address map: in `vcs_pkg`.

All defaults are the full-size design.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Every testbench has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/vcs_pkg.sv tb/tb_video_pkg.sv rtl/sync_2ff.sv rtl/line_buffer.sv \
  rtl/pixel_scaler.sv rtl/sram_controller.sv rtl/avalon_fabric.sv \
  rtl/video_controller.sv rtl/vga_controller.sv rtl/vcs_top.sv \
  tb/adv7181_model.sv tb/is61lv25616_model.sv tb/tb_vcs_top.sv \
  --top-module tb_vcs_top
./obj_dir/Vtb_vcs_top
```

For a single block, list only the files it uses and name its testbench as
the top module.

`tb_vcs_top` runs the top with every parameter at its default. It covers
about 116 ms of simulated time (three camera frames and several display
frames) and takes a few seconds. In that time it:

- stores a network frame;
- lets one camera frame be dropped;
- captures the next frame line by line;
- holds one line back, to force an overflow drop;
- checks every pixel of a full VGA frame.

Before it finishes, it checks that each of these happened at least once:

- a frame drop;
- a line drop;
- a processor stall caused by the display;
- a bus read held behind an outstanding read;
- a black half while its buffer was not ready;
- the bus ports of the external components being reached.

`tb_frame_rate` also runs the full-size top, at the two 4-bit frame rates
chosen for the network, 15 and 7.5 frames/s. The processor model admits
every 2nd, then every 4th, camera frame. The testbench checks:

- that exactly those frames are captured;
- that no line is lost;
- that the captured data rate per direction is 9.216 and 4.608 Mbit/s,
  within 1%;
- that the last frame sits in SRAM word for word.

It simulates about 570 ms and takes about 30 s.

The block testbenches cover the following:

- the pixel widening, exhaustively;
- the line buffer, across two clocks;
- the SRAM controller: one word per clock, latency 2, byte lanes,
  arbitration;
- the VGA controller: sync widths and periods, every pixel of three frames,
  ready gating;
- the bus: address decoding, relative addresses, stalls, the single
  outstanding read, unmapped accesses;
- the video controller: field order, frame and line drops, counters.

## How far to trust it, and where it departs

- **Built from a design description, not a finished implementation.**
  Several interface details are this design's own choices:
  - the register maps and address map;
  - the handshake registers;
  - the VGA timing numbers;
  - the SRAM arbitration and write-pulse scheme;
  - the choice of the top nibble of Y as the pixel.
- **Decoder model.** The decoder's exact output (which field comes first,
  where VS falls, the number of active samples) depends on how the chip is
  configured. The model assumes 640 active luminance samples per line, as
  the design intends. A line longer than 640 samples is cut at 320 pixels;
  a shorter one is stored as far as it goes.
- **Brightness.** With the default staggering, white is shown at about
  two thirds of full scale. Use `REPLICATE` for full-scale output.
- **Clocks.** The bus, the SRAM and the display share one 25 MHz clock;
  only the capture logic runs on the decoder clock. A faster processor
  clock would need a clock-crossing bridge, which is not included.
- **Not included:**
  - the processor and its software;
  - the Ethernet/UDP path;
  - the SDRAM controller and its phase-shifted PLL clock;
  - the JTAG modules.

  Frames received from the network reach the design only as processor
  writes into the remote buffer.
