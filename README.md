# Audio visualization device

This design turns sound into pictures. An audio codec samples a line input. A
1024-point FFT turns each block of samples into a spectrum, and a
640x480, 24-bit VGA display shows the spectrum as a row of coloured bars,
redrawn many times per second. A soft processor does the analysis: bar heights
from the squared magnitude of each bin, and colours from the overall loudness.
The hardware around it does everything that moves a lot of data:

* capturing audio across clock domains;
* feeding the FFT core and storing its results where the processor can read them;
* drawing into off-chip frame buffers fast enough for animation;
* keeping the display refreshed from those buffers without ever starving it.

Three display modes share the hardware:

* **Software rendering.** The processor writes every pixel itself, one bus write
  at a time, into a ZBT RAM frame buffer.
* **Hardware rendering.** The processor sends short command packets (clear,
  draw a bar, flip) over a point-to-point FIFO link. A rendering engine expands
  each one into thousands of memory writes.
* **Hardware rendering with fading.** The same, but the new frame starts from a
  dimmed copy of the previous one instead of a blank screen, so bars leave
  trails.

The RTL here covers the whole FPGA side and the push-button controller of the
board's CPLD. The processor, the FFT core, the codec, the SRAM chips, the video
DAC and the clock managers are bought or board parts. They appear as ports of
the top module, and the testbenches contain behavioural models of them.

## Block map

```
 buttons -> pb_cpld_ctrl ==serial==> pb_receiver ----------------------+
 codec  <-> ac97_controller -> async_fifo (samples, 1024x16) -> fft_controller <-> FFT core
                                                                  |
                                                        spectrum_buffer (2 x 1024 x 32)
 processor OPB master -> opb_bus -> pb / ac97 / fft / spectrum / vga registers,
                                    ZBT 0/1/2 memory windows
 processor FSL master -> sync_fifo (16 x 32) -> render_module
                                                 |  clear_buffer / fade_buffer / draw_fft_bin
 zbt_controller x3 : port 0 = VGA, port 1 = render, port 2 = OPB
     ZBT 0, ZBT 1 = frame buffers, ZBT 2 = fade buffer
 vga_controller : prefetch front buffer -> async_fifo (512 x 24) -> 640x480 timing
```

| File | Role |
|---|---|
| `rtl/av_pkg.sv` | bus structs (OPB, memory interface), render opcodes, address map, fade arithmetic |
| `rtl/av_top.sv` | system top |
| `rtl/zbt_controller.sv` | ZBT SRAM controller with two burst ports and an OPB port |
| `rtl/render_module.sv` | command decoder of the rendering engine |
| `rtl/clear_buffer.sv`, `rtl/fade_buffer.sv`, `rtl/draw_fft_bin.sv` | the three drawing engines |
| `rtl/vga_controller.sv` | prefetcher, pixel FIFO, VGA timing, flip register |
| `rtl/ac97_controller.sv` | AC-link framing, codec register writes, sample capture |
| `rtl/async_fifo.sv` | dual-clock FIFO (audio samples, VGA pixels) |
| `rtl/sync_fifo.sv` | FSL command link |
| `rtl/fft_controller.sv` | loads the FFT core from the sample FIFO, unloads the results |
| `rtl/spectrum_buffer.sv` | real and imaginary result memories, OPB readable |
| `rtl/pb_cpld_ctrl.sv`, `rtl/pb_receiver.sv` | push buttons: CPLD sender and FPGA receiver |
| `rtl/opb_bus.sv` | single-master OPB with OR-ed responses and timeout |
| `rtl/clk_align.sv` | reset release per clock domain after the clock managers lock |

## Clock domains

| Clock | Frequency | Logic |
|---|---|---|
| `clk_sys` | 50 MHz | OPB, FSL, rendering, ZBT controllers, FFT path, AC97 registers |
| `clk_vga` | 25.2 MHz | VGA timing and pixel output |
| `ac97_bit_clk` | 12.288 MHz (from the codec) | AC-link framing and capture |

Data crosses between domains only through FIFOs. Audio samples cross from the
bit clock to the system clock in `async_fifo`. Pixels cross from the system
clock to the VGA clock in the VGA controller's `async_fifo`. Both FIFOs use
Gray-coded pointers with two-flop synchronisers. A few quasi-static control
bits of the AC97 controller also cross domains: record enable and codec reset
go through two-flop synchronisers, and a codec register write uses a toggle
handshake. Each domain gets its reset from its own `clk_align`. That block
holds reset while the clock managers are unlocked or the external reset is
high, then releases it synchronously after 16 cycles.

## The ZBT memory controller

This is the block everything else depends on, and the hardest to read.

Each of the three 2 MB ZBT SRAMs (512K words of 32 bits) has one
`zbt_controller`. Three requesters share it, in fixed priority:

1. **Port 0, VGA.** The display must never starve, so it always wins.
2. **Port 1, renderer.** Used when this RAM is the back buffer or the fade buffer.
3. **Port 2, OPB.** Single words, used by software rendering. While the OPB
   request waits, the controller asserts `tout_sup` so the bus does not time it
   out.

### The burst interface (ports 0 and 1)

A port starts an operation by pulsing `read` or `write` for one cycle, together
with:

* `addr`, a word address;
* `be`, the byte enables;
* `burst_size`, where n means n+1 words, so 3 is a 4-word burst;
* for a write, the first data word on `write_data`.

The controller latches the request, so the port does not have to hold it while
another port is served. Once granted, the controller issues one address per
cycle. For an uncontended 4-word burst requested in cycle c:

| cycle | c | c+1 | c+2 | c+3 | c+4 | c+5 | c+6 | c+7 | c+8 |
|---|---|---|---|---|---|---|---|---|---|
| address issued | | w0 | w1 | w2 | w3 | | | | |
| `op_done` | | | | | 1 | | | | |
| read: `read_data_ready` | | | | | | w0 | w1 | w2 | w3 |
| write: `write_data_request` | | 1 | 1 | 1 | | | | | |

A write's first word comes with the request. Each `write_data_request` asks for
the next word, which the port presents in the following cycle.

`op_done` means that every address has gone to the RAM, not that the data has
arrived. A new operation, from the same port or another, may be pulsed in the
very next cycle, so it overlaps with the tail of the previous one. For example,
a read requested in cycle 2 delivers its data in cycles 7 to 10, reports
`op_done` in cycle 6, and a write can be requested in cycle 7. That write
reports `op_done` in cycle 11 while it is still completing inside the RAM. Back
to back, a port therefore moves 4 words every 5 cycles: 40 Mword/s at 50 MHz.
That is 1.6 times the 25.2 Mpixel/s the display needs.

### Inside

* **Request stage.** Each source's request goes into a register plus a pending
  bit. An arbiter picks the highest-priority pending source whenever the issue
  stage is free or is issuing its last word. This is where the overlap comes
  from.
* **Issue stage.** Counts through the burst and drives address, write enable and
  byte enables onto registered RAM pins.
* **RAM.** A pipelined ZBT SRAM. It needs write data two cycles after its
  address and returns read data two cycles after its address. The controller
  delays write data to match and registers the returned data once more before
  handing it to the port with `read_data_ready`.
* **Data pins.** The bidirectional pins are split into `zbt_dq_o`, `zbt_dq_oe`
  and `zbt_dq_i`. The pad buffer belongs outside the design.

Assertions in the controller check two rules of the handshake: a port never
pulses while its previous request is still waiting, and no request asks for a
read and a write at once.

## Rendering engine

`render_module` reads command packets from the FSL FIFO, one 32-bit word per
cycle. A packet is an opcode followed by its arguments:

| Opcode | Value | Arguments | Effect |
|---|---|---|---|
| `OP_CLEAR_BUFFER` | 0 | colour | fill the back buffer with the colour |
| `OP_FADE_BUFFER` | 1 | fade amount `0x00RRGGBB` | back buffer = last frame minus the amount, per channel, floor 0 |
| `OP_FLIP_BUFFER` | 2 | none | swap which frame buffer is drawn into |
| `OP_DRAW_FFT_BIN` | 3 | height, x, colour | paint column x from the bottom row up, `height` pixels, clipped at the top |

Pixels are one 32-bit word each, `0x00RRGGBB`, at word address `y*640 + x`. An
unknown opcode is skipped with no arguments. The decoder starts one engine and
waits for its `done` before it reads the next packet. The processor's blocking
FSL writes therefore stall only when the 16-word link is full.

**Status register.** The renderer also sits on the OPB as a read-only
register at `0x4005_0000`. Bit 0 is idle: no command running and none waiting
in the link. Bit 1 is the frame buffer being drawn into.

**Fading.** To fade, the engine needs the last frame. That frame is in the
buffer now being displayed, which the renderer must not read. So every engine
writes each pixel twice: into the back buffer and into the same address of the
third RAM, the fade buffer. The fade buffer therefore always holds a copy of
the most recently drawn frame. `fade_buffer` reads it in 4-word bursts,
subtracts the amount from each colour channel with saturation at 0, and writes
the result to both RAMs.

**Engine speeds.**

* `clear_buffer` and `fade_buffer` work in 4-word bursts on both RAMs at once.
* A clear of the full screen takes 307,200/4 × 5 cycles = 7.7 ms.
* A fade has a read burst in front of each write burst and waits for the read
  data, so it is slower. The full-size simulation measures a frame at:
  * 7.7 ms for clear, bars and flip;
  * 21.6 ms for fade, bars and flip.
* `draw_fft_bin` writes single words, one per row, because a column's pixels are
  640 words apart.

**Flip.** A flip only changes which frame buffer the renderer draws into; after
reset that is frame buffer 1. What the monitor shows is a separate register in
the VGA controller, written over OPB. Software flips in this order:

1. send `OP_FLIP_BUFFER`;
2. poll the renderer's status register until it reports idle;
3. write the VGA buffer register;
4. poll that register until it reports the new buffer in use;
5. send the clear or fade for the next frame.

Skipping step 4 lets the next frame's drawing appear on screen. Skipping step 2
can show a half-drawn frame.

## VGA controller

The timing is 640x480 at 60 Hz with syncs active low: 800 pixel clocks per
line (16 front porch, 96 sync, 48 back porch) and 525 lines per frame (10, 2,
33). All numbers are parameters.

**System-clock side.** A prefetcher walks the front buffer from pixel 0 to
pixel 307,199 and around again. It issues 4-word read bursts on the VGA port of
that buffer's ZBT controller whenever the 512-entry pixel FIFO has room for the
burst on top of the words already in flight.

**Pixel-clock side.** The timing generator pops one word per visible pixel. The
two sides never exchange frame positions. They stay aligned because the pixel
side starts at the first line of vertical blanking after reset, which gives the
prefetcher a whole blanking period to fill the FIFO, and because the FIFO never
runs dry after that. If it ever did, the pixel would be black and the sticky
`underflow` output would be set.

**Flip register** (OPB, `0x4004_0000`):

* Write bit 0 to choose the buffer to display.
* Read bit 0 for the chosen buffer and bit 1 for the buffer in use.

The prefetcher switches only when it is about to fetch pixel 0 and no burst is
in flight, so every frame on the screen comes entirely from one buffer.

## Audio path and FFT

**AC97 controller.** `ac97_controller` frames the AC-link: 256-bit frames at
48 kHz, with `SYNC` high for the 16-bit tag slot and 20-bit slots after it.

* It sends codec register writes requested over OPB (slots 1 and 2). Software
  uses these to select the line input and set gains.
* It records only the left channel: the top 16 bits of input slot 3. A sample
  is recorded only when the codec marks the frame valid and slot 3 valid, and
  only while recording is enabled.
* Samples go into the 1024 × 16 sample FIFO. A sample that finds the FIFO full
  is dropped and counted.
* Bit timing: `SYNC` and `SDATA_OUT` change on the rising edge of the bit
  clock. The codec answers one bit period later, so input bit k fills period
  k+1. It is captured on the falling edge in the middle of that period.

**FFT controller.** Software writes 1 to the FFT control register. The
controller then:

1. waits until 1024 samples are buffered;
2. pulses the core's `start`;
3. pops samples while the core asserts `rfd` (real input, imaginary 0);
4. writes each output bin into the spectrum buffer as it appears with `dv`.

The core's output is 27 bits, unscaled: 16 + 10 + 1. The spectrum buffer
stores it sign-extended to 32 bits. The processor reads the real part of bin k
at `0x4003_0000 + 4k` and the imaginary part at `0x4003_0000 + 4(1024 + k)`.

Between transforms the sample FIFO fills and then drops the newest samples, so
each transform always works on 1024 consecutive samples.

## Push buttons

The ten buttons are wired to the board's CPLD, not to the FPGA.

**`pb_cpld_ctrl` (on the CPLD).** It sends all ten states over one line when
ENTER (button 9) goes down and the other nine differ from what it last sent.
Frame format: idle high, a 0 start bit, 10 data bits LSB first, a 1 stop bit,
16 clocks per bit.

**`pb_receiver` (on the FPGA).** It samples each bit in the middle of its
period and discards frames with a bad stop bit. It keeps the states in a
register (`0x4000_0000`): bits 9:0 hold the states, and bit 31 flags a new
frame and is cleared by reading.

Software uses the button combinations to switch display modes.

## OPB address map

| Base | Slave |
|---|---|
| `0x4000_0000` | push buttons |
| `0x4001_0000` | AC97: 0 control (bit 0 record, bit 1 codec reset release), 4 command (`index[22:16]`, `data[15:0]`), 8 status (bit 0 write pending, bit 1 codec ready, 31:16 dropped samples) |
| `0x4002_0000` | FFT: 0 control/status (write bit 0 start; read bit 0 busy, bit 1 done, bit 2 waiting for samples), 4 samples buffered |
| `0x4003_0000` | spectrum, real then imaginary |
| `0x4004_0000` | VGA buffer select |
| `0x4005_0000` | renderer status (read only): bit 0 idle, bit 1 back buffer |
| `0x5000_0000`, `0x5020_0000`, `0x5040_0000` | ZBT 0, 1, 2 (2 MB each, byte addresses, 32-bit words) |

Register slaves acknowledge one cycle after select. `opb_bus` ORs all slave
responses. If nobody acknowledges within 16 cycles and no slave asserts
`tout_sup`, it ends the transfer with `timeout`.

## Simulating

Every block has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=<n> failures=<n>`. With plain Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_av_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/av_pkg.sv tb/tb_pkg.sv tb/tb_av_top.sv
./obj_dir/Vtb_av_top
```

Replace `tb_av_top` with any other testbench name. The package files are
listed first because `-y` finds modules but not packages. `tb_pkg.sv` holds the
audio test signal and can always be listed.

**`tb_av_top`** runs the whole system at full size with no parameter overrides:
640x480, 1024-point FFT, 2 MB RAMs. It takes about 15 s of wall time for
135 ms of simulated time. A processor model goes through recording setup, a
button combination and one frame in each display mode. The two-tone test
signal must produce its two peaks at bins 32 and 128. Drawn, cleared and faded
pixels are checked in the RAMs. Every frame that reaches the VGA outputs must
equal one whole frame buffer, pixel for pixel. The test also counts each
mechanism and fails if any never happened: clear, fade, flip, draw, FFT, button
frame, overlapped memory operation, arbitration wait, software pixel write, VGA
frame, recorded sample and codec register write.

The block testbenches use reduced sizes where the full size would only add run
time:

* **`tb_render_module`:** 16x8 screen, with the three RAMs behind real
  controllers. It checks every pixel after every command, the 5-cycles-per-burst clear rate,
  and the OPB status register (busy while drawing, idle after).
* **`tb_vga_controller`:** 16x6 screen. It checks sync widths, periods and
  porches, every pixel, a tear-free flip, and no underflow while the renderer
  competes for the RAM.
* **`tb_zbt_controller`:** the cycle-exact burst timing above, overlap,
  priority, byte enables and random traffic on all three ports against a
  reference memory.

Behavioural models used by the testbenches:

* `zbt_ram_model`: a pipelined ZBT SRAM;
* `ac97_codec_model`: plays a sine-pair test signal and records register writes;
* `fft_core_model`: an exact DFT behind a streaming handshake.

## What is assumed

Several details are this design's own choices, made where the original design
gives only the function:

* **Invented formats:** the opcode values, the address map and register
  layouts (including the renderer's status register), and the push-button
  line format.
* **Fade buffer:** its use as a running copy of the frame being drawn.
* **Memory controller internals:** the fixed port priority and the controller's
  internal pipeline.
* **VGA:** the standard 640x480 porch and sync numbers, and the sizes of the
  pixel and FSL FIFOs. The resolution is a parameter. `av_top` refuses, at
  elaboration, a frame larger than one 2 MB RAM; 800x600 still fits.
* **Interfaces to bought parts:** the AC97 controller is a new minimal one. The
  FFT core's handshake is modelled on a typical streaming core.

The interface timing of the memory controller (the table above) is the
original design's. The frame rates the original system reached, 2.48 frames/s
in software mode and 7.8 in both hardware modes, depend mostly on the processor
software and were not reproduced here. The full-size simulation measures the
hardware side:

* 7.7 ms for a cleared frame with bars;
* 21.6 ms for a faded frame with bars;
* 60 ns per OPB pixel write on an otherwise idle bus (18 ms for a full frame).

All three are far below the 128 ms and 403 ms frame periods of those rates.
This agrees with the observation that both hardware modes run at the same rate,
limited by software rather than by drawing.

## Resources

Yosys reports these figures for the top module with all defaults. They are
only indicative:

* about 2,460 flip-flops;
* about 95 kbit of memory: the 512 × 24 pixel FIFO, the 1024 × 16 sample FIFO,
  the 2 × 1024 × 32 spectrum buffer and the FSL FIFO.

The frame buffers are the off-chip SRAMs.
