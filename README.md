# MMX: an ATM multimedia explorer in SystemVerilog

The MultiMedia eXplorer (MMX) is a small board that sits between an ATM
network and an ordinary workstation. It gives the workstation live
JPEG-compressed NTSC video, CD-quality stereo audio and a high-resolution
radiographic image stream without any of that data crossing the host's bus.
The board sees the cell stream on its way to the host. It picks off the cells
addressed to itself and hands the rest to the host. It also merges its own
outgoing cells, and the host's, into one stream toward the switch.

This RTL is the board's digital glue logic:
- the **ATMizer** cell interface: receive routing, transmit arbitration and
  header insertion;
- the host's **"Y" connection**;
- the **PBUS** control bus;
- the logic parts of the **video**, **audio** and **image** channels.

The commercial chips attach at ports of the top module `mmx_top`. These are
the local 68030 CPU, the TAXI link chips, the JPEG chip set, the video
digitiser and encoder, the audio codec and the audio DSP. None of them is
modelled here.

Everything runs on one clock, `clk`. The audio divider assumes 20 MHz. The
other rates of the real board enter as one-clock strobes: the line slots of
the TAXI links, the video coder's words and the audio sample tick. All
flip-flops reset asynchronously on `rst_n` (active low).

## The cell stream

An ATM cell here is 53 bytes, carried one byte per strobe:

| bytes | content |
|---|---|
| 0..3 | header: GFC/VPI/VCI/PT/CLP in the usual UNI layout |
| 4 | HEC, the CRC-8 of the header (x^8 + x^2 + x + 1) XORed with 0x55 |
| 5..52 | 48-byte payload |

A `soc` flag marks byte 0 of each cell.

### Receive: Header Buffer, HEC, Route and Function table, Receiver Control

Received bytes enter `header_buffer`, a five-byte shift register. When header
byte 3 arrives, it takes 15 bits out of the header: VPI[2:0] followed by
VCI[11:0]. Those bits index `route_table`, a 32K-entry table. The table
answers before the cell's first byte leaves the buffer, so routing costs no
clocks.

In parallel, `hec_check` recomputes the HEC and flags `hec_ok` when byte 4
arrives.

Each table entry is six bits:

| bits | field | meaning |
|---|---|---|
| [5:3] | `dest` | 0 none, 1 CPU RxFIFO, 2 video, 3 audio, 4 image |
| [2] | `deliver_hdr` | pass the four header bytes |
| [1] | `deliver_hec` | pass the HEC byte |
| [0] | `deliver_payload` | pass the 48 payload bytes |

`rx_control` turns the entry and each byte's position into one of four FIFO
write strobes. Any mix of the three parts can be delivered:
- the CPU normally takes whole cells;
- the media channels take payload only;
- a cell can be reduced to its HEC byte alone, to count cells cheaply.

With HEC dropping enabled (PBUS register `0x2000` bit 0), a cell whose HEC
failed delivers nothing.

An entry with `dest` = 0 ignores the cell. That is the state of every entry
after reset: the table sweeps itself to zero for 32,768 clocks while
`rt_init_busy` is high. Program it only after that.

### Transmit: Transmitter Control and Source Select, Header Generation

Five byte FIFOs feed the transmitter. In priority order they are:
1. audio;
2. video;
3. image, an external source on the `img_src_*` port;
4. the Y connection;
5. the CPU's TxFIFO.

Between cells, `tx_select` looks at the programmable-full flags and starts a
cell from the highest-priority source whose flag is up. It then sends the
whole cell, one byte per `net_tx_rdy` slot, before it looks again.
`tx_contended` counts the cell starts at which more than one source was
ready.

A source can have its header inserted. `header_gen` holds a 32-bit header for
each of the five sources, and an enable bit per source. For an enabled source
the selector:
1. sends the stored header;
2. sends the HEC computed from it;
3. reads only the 48 payload bytes from the source.

After reset, insertion is on for audio, video and image, and off for Y and
the CPU, which write complete cells. The flag threshold decides how much a
source must hold before it can start:
- 48 bytes for a source whose header is inserted;
- 53 bytes for one that writes complete cells.

### The Y connection: null cell deletion

The host's outgoing cells pass through `null_cell_delete` into the YFIFO. The
block holds four bytes back. A cell whose GFC, VPI and VCI are all zero is
dropped whole; every other cell is written unchanged. The block counts the
cells it keeps and deletes.

## PBUS and register map

The CPU controls the board by writes on the PBUS. This is a 16-bit
multiplexed bus:
- `pbus_master` puts the address on `pbus_ad` with `pbus_ale` for one clock;
- in the next clock it puts the data there with `pbus_wr`;
- `pbus_slave` latches the pair into one write record, which every register
  in the design decodes.

Reads are not modelled. The CPU reads the audio mailbox directly through
`cpu_mem_*`.

| address | register |
|---|---|
| `0x0000` | route table index (VPI[2:0], VCI[11:0]) |
| `0x0001` | route table data: writes the entry at the index |
| `0x1000 + 2*src` | upper 16 bits of the header for source `src` (0 audio, 1 video, 2 image, 3 Y, 4 CPU) |
| `0x1001 + 2*src` | lower 16 bits of that header |
| `0x1010` | header insertion enables, bit per source (reset `00111`) |
| `0x2000` | bit 0: drop cells with a bad HEC |
| `0x2001 / 0x2002 / 0x2003` | programmable-full level of the RxFIFO / TxFIFO / YFIFO (reset 53) |
| `0x4000` | video: bit 0 transmit on, bit 1 receive on |
| `0x4001` | video transmit FIFO full level (reset 48) |
| `0x5000` | audio: bit 0 tx on, bit 1 rx on, bit 2 mono, bits 5:3 rate, bit 7 clears the error flag, bit 8 loopback, bit 9 mix |
| `0x5001` | audio transmit FIFO full level (reset 48) |
| `0x5002` | audio volume: bits 7:0 left, bits 15:8 right; 128 is unity gain (reset `0x8080`) |
| `0x5400..0x57FF` | audio two-port memory, CPU side (low byte of the data) |

The map is this design's own choice. The real board's decoding is not
described.

## Video channel

**Transmit.** The JPEG coder's 16-bit code words and its last-code flag
(`vid_coder_lcode`) go into a 17-bit FIFO. `video_tx_control` watches
`vid_vsync`: on each rising edge it enables the coder and asks for a
start-of-field tag, alternating between field one and field two.
`tag_stuffer` builds the byte stream:
- `FF D0` (field one) or `FF D1` (field two);
- each word, high byte first;
- after the word marked last, `FF D9`.

A word that arrives while no field is open is dropped and counted. The bytes
go into the video transmit FIFO. Its full flag, at 48 bytes, lets the
selector take one payload at a time.

**Receive.** Payload bytes go into the video receive FIFO. `tag_stripper`
removes the three tags and turns the rest back into 16-bit words for the
decoder (`vid_dec_*`). It reports each tag as a pulse. The coder must not
emit `FF D0`, `FF D1` or `FF D9` itself: JPEG byte stuffing already
guarantees that. Other `FF xx` pairs pass through as data.

`video_rx_control` opens the decoder's clock gate (`vid_dec_en`) whenever
data is waiting and reception is on. It also steers the frame buffer:
- a start-of-field tag resets that field's write pointer and selects it for
  writing;
- the end-of-field tag is only counted; writing to the field stays open until
  the next start tag.

**Frame buffer.** `frame_buffer` holds two field memories of 153,600 16-bit
words each, one NTSC field of 640 x 240 pixels in 4:2:2 form. Its pointers
work like the field memories it replaces:
- each field has its own write pointer and read pointer;
- the pointers increment independently and wrap, so they may pass each other;
- each pointer resets to zero on its own.

The decoded pixels arrive on `vid_pix`. The display encoder reads with
`vid_fb_re` and `vid_fb_rd_reset`. Read data is registered, so it is valid
one clock after `re`. The decoder side and the display side never wait for
each other, which is the point of the frame buffer.

## Audio channel

**Transmit.** `audio_rate_gen` produces the sample tick. Its base rate is
44.1 kHz, `DIV_441` = 454 clocks at 20 MHz. `rate_sel` divides that by 1,
1.5, 2, 2.5, 3, 4, 5 or 6, which gives the eight rates from 44.1 kHz down to
7.35 kHz. On each tick, `audio_packer` writes the sample into the audio
transmit FIFO: left high, left low, right high, right low. In mono mode it
writes only left. A stereo 48-byte payload therefore carries twelve pairs,
one cell every 272 us at 44.1 kHz.

**Receive and rate adaptation.** The far end's sample clock is never exactly
the local one, so `audio_rate_adapt` keeps the receive FIFO between a quarter
and three quarters full. At each sample tick it plays one pair. At the first
pair of each cell's worth of samples, it looks at the FIFO's flags:

| FIFO state | action |
|---|---|
| below 1/4 | the last pair of this cell is played twice (duplication) |
| above 3/4 | the first pair of this cell is skipped (deletion) |
| empty | zeros are played until data arrives |
| full | the FIFO is reset and `aud_err` is set for the CPU |

After a full-FIFO reset, the rest of the cell being received is discarded, so
the FIFO restarts on a pair boundary. Counters record every duplication,
deletion and zero sample. Sample ticks must be at least 10 clocks apart,
which holds at every rate.

**Volume, loopback and mixing.** Before the samples leave on
`aud_left_out`/`aud_right_out`, `audio_mixer` processes each pair:
- it picks the pair to play:
  - normally the received pair;
  - with loopback, the local input pair latched at the last sample tick;
  - with mixing, the sum of the two, saturated to 16 bits;
- it then scales each channel by its 8-bit volume: `out = sample * vol / 128`,
  saturated.

A volume of 128 passes the sample unchanged, 0 mutes, and values up to 255
amplify. If both loopback and mix are set, loopback wins. The result comes
out one clock after the rate adapter's sample.

**Two-port memory.** `two_port_mem` is a 1K x 8 memory. The CPU uses one
port; the DSP uses the other (`dsp_*`). It has a mailbox interrupt in each
direction:
- a CPU write to the last location (0x3FF) raises `dsp_int`, and a DSP read
  of that location clears it;
- a DSP write to 0x3FE raises `cpu_int`, and a CPU read clears it;
- on a same-clock write to one address, the CPU side wins.

## Image channel

`image_channel` buffers the image payload bytes in a 1,024-byte FIFO. It
sends one byte to the display's TAXI transmitter at each `img_taxi_rdy` slot
while data waits: 40 Mb/s on the real link. It counts bytes sent and bytes
lost to overflow.

## Files

| file | block |
|---|---|
| `rtl/mmx_pkg.sv` | cell constants, route entry and PBUS types, register map, HEC function |
| `rtl/mmx_fifo.sv` | first-word-fall-through FIFO with level, programmable full and quarter flags |
| `rtl/header_buffer.sv`, `hec_check.sv`, `route_table.sv`, `rx_control.sv` | receive path |
| `rtl/header_gen.sv`, `tx_select.sv` | transmit path |
| `rtl/null_cell_delete.sv` | Y connection |
| `rtl/pbus_master.sv`, `pbus_slave.sv` | PBUS |
| `rtl/video_tx_control.sv`, `tag_stuffer.sv`, `tag_stripper.sv`, `video_rx_control.sv`, `frame_buffer.sv` | video |
| `rtl/audio_rate_gen.sv`, `audio_packer.sv`, `audio_rate_adapt.sv`, `audio_mixer.sv`, `two_port_mem.sv` | audio |
| `rtl/image_channel.sv` | image |
| `rtl/mmx_top.sv` | everything wired together |
| `tb/tb_<block>.sv` | a self-checking testbench per block |

Each file opens with a comment on its function, interface and timing, and on
which choices are its own.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
built-in watchdog counts a failure if the simulation hangs. For example:

```
verilator --binary --timing -Irtl rtl/mmx_pkg.sv rtl/mmx_fifo.sv \
    rtl/image_channel.sv tb/tb_image_channel.sv --top-module tb_image_channel
./obj_dir/Vtb_image_channel
```

For the whole design, list every file in `rtl/` with the package first:

```
verilator --binary --timing -Irtl rtl/mmx_pkg.sv $(ls rtl/*.sv | grep -v mmx_pkg) \
    tb/tb_mmx_top.sv --top-module tb_mmx_top
./obj_dir/Vtb_mmx_top
```

`tb_mmx_top` runs the top at its default sizes. It loops the transmitter back
into the receiver, then does the following:
1. programs routes and headers over the PBUS;
2. sends CPU cells, including one with a bad HEC and one on an unrouted VCI;
3. sends host cells mixed with null cells;
4. sends six video fields;
5. streams audio, plus bursts of extra audio cells that force deletion and
   overflow, then plays it at half volume, looped back and mixed;
6. sends image cells and one external-source payload;
7. exchanges mailbox messages.

It compares all the data, then reads both fields back out of the frame
buffer. It also checks that each of these happened at least once:
- routing to each FIFO;
- HEC drop and null deletion;
- transmit contention;
- each kind of field tag;
- audio duplication, deletion, zero fill and overflow;
- volume, loopback and mixing;
- the discarding of a partly received cell after an audio overflow;
- cells sent back to back at one byte per clock;
- both interrupts.

It runs about 240,000 clocks, which takes under a second.

`tb_frame_buffer_full` runs the frame buffer at its full field size. The
display side reads a whole field while the decoder writes the other, one
word per clock each, and then both pointers wrap. It checks all 307,206 words
it reads.

Each block testbench was also run against a copy of its block with one
deliberate bug, and each one reported failures.

## Where this design departs from the original board

- **Stand-ins for chips.** On the board, the DSP does all the audio work in
  software: packing, rate adaptation, volume, loopback, mixing and channel
  control. The CPU sets the volume and sampling rate through the mailbox
  memory. Here that work is logic blocks controlled by PBUS registers, and
  the mailbox memory is just a memory with interrupts. The way volume,
  loopback and mixing are computed is this design's own; the original
  describes only what they do.
- **Mailbox size.** The audio mailbox memory is 1K x 8. The board's
  description also mentions a 2-kilobyte memory. The smaller size matches
  its block diagram.
- **Own choices.** The field tag codes `D0`/`D1`/`D9` come from the JPEG
  marker range. The following are also this design's own:
  - which 15 VPI/VCI bits index the route table;
  - the header byte order and the route entry layout;
  - the register map;
  - all FIFO depths;
  - the tick-based timing.
- **One clock.** The board has separate clock domains: the coder's sample
  clock, the decoder's gated clock, the display pixel clock and the link
  clocks. Here they are one clock with strobes. To use the blocks across real
  clock domains, replace the FIFOs with dual-clock FIFOs. The frame buffer
  also becomes dual-clock.
- **Not modelled.** PBUS reads, the CPU's own bus, and the configuration of
  the video chips over I2C.
