# Strip-sensor image capture and display chain

A push-broom imager builds a 2-D picture from one-dimensional sensors: each
sensor is a single row of pixels, and the second dimension comes from moving
the scene past it, one read-out per step. To get a wide swath, four
704-pixel strip sensors (A, B, C, D) are placed side by side. They cannot be
butted end to end in one package, so they are staggered: A and C sit on one
row and B and D on the next. At any instant, B and D look at the scene line
that A and C saw one step earlier. A raw read-out of all four sensors is
therefore a sawtooth, not a straight 2816-pixel line.

This RTL implements the electronics that turn those read-outs into a usable
image and show it live:

* **ICAI** (image combiner and acquisition interface). This chip clocks the
  sensors once every 1000 host-clock cycles. It re-aligns the staggered rows in
  a small line memory and returns one straight 2816-pixel line per period to a
  host, framed as a 706-word packet.
* **FPGA integrator**:
  * an ICAI controller that a CPU drives over an Avalon-MM slave;
  * a FIFO;
  * a four-port SDRAM frame buffer;
  * an 800×600 VGA output.
* **Sensor emulator**. It stands in for the four sensors, playing a
  stored 704×704 1-bit pattern magnified four times in each direction, which
  gives a 2816×2816 image.

Everything is SystemVerilog-2017 and synthesizable. The exceptions are the
testbenches and the SDRAM model in `tb/`.

```
 sensor_emulator --PDATA[31:0]--> icai --HWRDATA/HREADY--> icai_controller --FIFO--> multiport_sdram_ctrl --> vga_pixel_feed --> vga_controller --> DAC pins
   (pattern_dpram x2)   <--reset/PGA/strobe--  |             (ctrl_logic, avalon    | write port 0      read port 0
                                   (cis_ctrl, combiner,       slave, fifo_ram)     | CPU ports: write 1 / read 1
                                    line_sram, host_if)        ^ Avalon slave (CPU)
```

## The ICAI protocol

The host talks to the ICAI through HSELx, HTRANS and HWRITE, which select a
state:

| HSELx | HTRANS | HWRITE | state         |
|-------|--------|--------|---------------|
| 0     | x      | x      | disabled      |
| 1     | 1      | 1      | configuration |
| 1     | 1      | 0      | read image    |
| 1     | 0      | 1      | idle          |
| 1     | 0      | 0      | reserved      |

In the configuration state, the host-to-ICAI half of HWRDATA (`hwdata`)
carries a 32-bit word:

| bits   | register               | meaning                                          |
|--------|------------------------|--------------------------------------------------|
| [31:7] | `reg_requestedrowx704` | N, the number of 704-line blocks to capture       |
| [6:4]  | `reg_pga`              | sensor PGA gain                                  |
| [3:0]  | `reg_sample_delays`    | DL, the PGA and ADC latency, in cycles            |

In the read-image state, time is cut into 1000-cycle periods, counted from 0.
L = 704·N is the number of output lines.

* **Period 0** takes the configuration. The sensors are held in reset with
  the PGA value on their pins, and reset is released in the last cycle.
* **Periods 1 … L+1** each start with a one-cycle `strobe`. The sensors read
  out one line, and the ICAI samples `pdata` for 704 cycles starting at cycle
  247 + DL of the period.
* **Periods 3 … L+2** each carry one output packet of 706 words, also
  starting at cycle 247 + DL. `hready` is high for exactly those 706 cycles:
  * 704 pixel words;
  * the line index (1 … L);
  * `EOL` (`32'h454F4C00`), or `EOF` (`32'h454F4600`) after the last line.

  The first output line therefore appears in period 3: one period of
  configuration and two of latency.

A pixel word holds the same pixel index of all four sensors, with A in
`[7:0]`, B in `[15:8]`, C in `[23:16]` and D in `[31:24]`. Its 704 words thus
carry the 2816 pixels of one line. The sensor emulator uses the same packing
on `pdata`.

## How the combiner removes the stagger

Output line n must hold A(n), B(n+1), C(n), D(n+1), where the number is the
acquisition index. B and D of line n arrive one period after A and C. That is
why there is one more acquisition than output lines.

The line SRAM (`icai_line_sram`) has three slots of 704 words, kept in two
banks: an A/C bank and a B/D bank, each 16 bits wide and each with its own
write port. In period p (slot = p mod 3):

* A and C of acquisition p are written to slot p mod 3;
* B and D of acquisition p are written to slot (p−1) mod 3. This completes
  line p−1, whose A/C arrived a period earlier.
* Slot (p+1) mod 3 = (p−2) mod 3 was completed in period p−1 and is read out
  as line p−2.

The read is registered. The host interface therefore presents the address
of word k+1 while word k is on the bus, so the read latency is hidden.

`icai_combiner` only computes write enables and addresses. It is
combinational, driven by `icai_cis_ctrl`'s counters. `icai_host_if` decodes
the state, holds the configuration, and muxes pixel, index and symbol words
onto `hrdata`.

## ICAI controller (FPGA side)

`icai_ctrl_logic` does the capture:

1. On a start command: one cycle of idle, one cycle of configuration (with
   the CONFIG register on `hwdata`), then read image.
2. For each packet: the 704 pixel words go into `fifo_ram`, and the
   line-index word is kept.
3. The closing symbol is checked. `EOF` ends the capture and returns the ICAI
   to idle. A symbol that is neither `EOL` nor `EOF` sets `sym_err`. A pixel
   that finds the FIFO full is dropped and sets `overflow`.

The SDRAM therefore receives a plain image of 704 words per line.

`icai_avalon_slave` registers. Reads have one wait cycle; writes have none.

| addr | name    | access | content                                        |
|------|---------|--------|------------------------------------------------|
| 0    | CONFIG  | R/W    | configuration word sent to the ICAI            |
| 1    | CONTROL | W      | bit 0: start a capture                         |
| 2    | STATUS  | R      | {sym_err, overflow, done, busy}                |
| 3    | ADDRESS | R/W    | frame-buffer word address                      |
| 4    | LINE    | R      | line index of the last packet                  |
| 5    | COUNT   | R      | packets received in this capture               |

## Multi-port SDRAM controller

`multiport_sdram_ctrl` has two write ports and two read ports:

* write 0: the ICAI controller;
* read 0: the display;
* write 1 and read 1: the CPU.

**Ports.** Each port is a dual-clock gray-code FIFO (`async_fifo`), so every
client keeps its own clock. Each port also has a window sequencer
(`sdram_addr_gen`): base, words per line, pitch, and number of lines. The
sequencer walks the window in bursts of 8 words and wraps to the base at the
end. A window with 0 lines switches the port off.

**Start pulses.** `start[3:0]` is one pulse per port, in the order {read 1,
read 0, write 1, write 0}. A pulse loads that port's window. The first pulse
on any bit also runs the SDRAM power-up sequence: T_INIT cycles of NOP,
PRECHARGE ALL, two AUTO REFRESH, then LOAD MODE (BL 8, CL 2).

**Arbitration.** One burst runs at a time. A write port is eligible when
its FIFO holds 8 words. A read port is eligible when its FIFO has room for 8.
The fixed priority is:

1. refresh (every 750 cycles);
2. display read;
3. capture write;
4. CPU read;
5. CPU write.

**Bursts.** A burst is ACTIVE, then READ or WRITE with auto-precharge, then
8 data beats and recovery. The memory is 32-bit, 4 banks × 8192 rows × 512
columns. The word address is {bank, row, column}. Read data is taken CL+1
cycles after the READ command leaves the controller's registers.

The DQ bus is split into `sdram_dq_out`, `sdram_dq_oe` and `sdram_dq_in`. A
pad-level wrapper joins them into a tristate.

## Display

`vga_controller` has these parts:

* H and V counters (VESA 800×600 at 60 Hz, 40 MHz pixel clock, positive
  syncs);
* a data request (`read_en`) for every visible pixel;
* an RGB register;
* an output stage that aligns syncs, blank and colour, two cycles after the
  counters.

`rgb_in` is expected one cycle after `read_en`.

`vga_pixel_feed` pops one SDRAM word for every four visible pixels. It shows
the four bytes as four gray pixels, A first, expanded to 10 bits for the DAC.
The display window is 200 words × 600 lines at the frame address with a
704-word pitch. The screen therefore shows a raw view of the frame buffer:
each group of four screen pixels holds the four sensors' pixels of one
index.

The display and feed are held in reset until the read FIFO first holds data.
This keeps the word stream and the raster in step. If the FIFO is ever
empty on a request, `vga_underflow` counts it.

## Sensor emulator

Two `pattern_dpram`s each hold half of every pattern line: 44 bytes × 704
lines, 1 bit per pixel, bit 7 leftmost. Each memory has two registered read
ports. Sensors A and B read the left half; C and D read the right half.

On a `strobe`, sensor s delivers pixel j of output line r in cycle
LATENCY + j after the strobe. That pixel is pattern pixel (176·s + j/4, r/4),
which repeats every pattern pixel and line four times. White is `8'hFF` and
black is `8'h00`.

The pattern is computed at elaboration: pixel (x, y) is black when
(x/64 + y/48) is odd or |x − y| < 8. `cis_reset` restarts it at line 0.

The emulator is not staggered. The captured image therefore shows the A/C
halves one line above the B/D halves, which is the expected artefact of
driving the combiner with an aligned source.

**DL setting.** The emulator's LATENCY defaults to 247. DL must be set to
LATENCY − 247, which is 0 at the defaults.

## Clocks and reset

| clock       | drives                                    | rate used in the testbenches |
|-------------|-------------------------------------------|------------------------------|
| `hclk`      | emulator, ICAI, ICAI controller           | 8 MHz                        |
| `sdram_clk` | SDRAM controller                          | 100 MHz                      |
| `vga_clk`   | display                                   | 40 MHz                       |
| `cpu_clk`   | CPU SDRAM ports                           | 50 MHz                       |

Only the SDRAM port FIFOs cross between clock domains. The window registers
and `frame_addr` are treated as quasi-static: set them before pulsing
`start`.

`rst_n` is an asynchronous, active-low reset. Every register is reset.

## Using the top

1. Write CONFIG and ADDRESS.
2. Pulse all four `sdram_start` bits and wait for `sdram_init_done`.
3. Write 1 to CONTROL.
4. Poll STATUS until `done`.

The frame lands at ADDRESS, 704 words per line, 2816 lines per window
(`FRAME_LINES`). The window wraps, so a longer capture overwrites from the
top.

To read from or write to the frame buffer, the CPU sets up its port windows
and pulses only that port's `sdram_start` bit. The display keeps running.

## Departures and open points

* **Clock rate.** One 8 MHz clock runs the sensor interface. The original
  system gave the emulator and the ICAI controller a 16 MHz clock with an
  8-bit data path. Here a 32-bit word moves per 8 MHz cycle: the same line
  timing at a different width.
* **Host bus split.** The ICAI's bidirectional HWRDATA bus is split into
  `hwdata` and `hrdata`. The ICAI chip and the FPGA logic share one top so
  that the chain can be simulated as a whole.
* **Design choices.** The following are all choices of this design:
  * byte order in a pixel word;
  * `EOL`/`EOF` codes;
  * sensor reset, strobe and sample-window timing;
  * line SRAM organisation;
  * controller register map and FIFO depth;
  * SDRAM geometry, timings and arbitration;
  * display mapping;
  * pattern contents.
* **Single start pulse.** The original SDRAM controller was started by one
  pulse. Here each port has its own, so that CPU traffic cannot disturb the
  display.
* **Package offset.** The combiner corrects a package offset of exactly one
  line. Other offsets, overlaps and gray-level differences between sensors
  are left to host software, which is not part of this RTL.
* **Outside this RTL.** The CPU, the bus fabric, PLLs, the video DAC, the
  memory chips and the debug link are not included. Their signals are ports
  of `imaging_system_top`.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* `tb_imaging_system_top` runs the whole chain at reduced size: 64-pixel
  sensors, a 200-cycle period, DL = 3, and a 32×12 display. It checks:
  * every frame-buffer word against an independent model of emulator and
    combiner;
  * the controller registers;
  * a CPU write and read-back;
  * one displayed frame, pixel by pixel.

  It counts each mechanism: configuration, EOL and EOF packets, lines
  where the stagger correction changes the data, FIFO buffering, SDRAM
  write/read bursts, refresh, and VGA frames. It fails if any never
  happened.
* `tb_imaging_system_full` does the same with every parameter at its
  default. It captures the full 2816×2816 image (N = 4), checks 1,982,464
  frame words and one 800×600 frame, and takes about a minute with
  Verilator.
* `tb/sdram_model.sv` is a behavioural SDR SDRAM. It checks command timing
  and refresh intervals.

Simulate with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/icai_pkg.sv tb/tb_imaging_system_top.sv \
          -y rtl -y tb --top-module tb_imaging_system_top -o sim
obj_dir/sim
```

Replace the testbench name to run any other test.

**Known warnings.** Verilator lint warnings remain:
* unused package constants;
* unused outputs, such as `capture_start` at the top;
* the FIFO `count` port left open in the controller;
* `rst_n` used both as an asynchronous reset and in assertions.

None of them affects behaviour.
