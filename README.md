# FS-4 frame store: RTL for a PC XT/AT image-capture and display board

FS-4 is a plug-in frame store for an IBM PC XT/AT that sits between a CCD
camera digitizer, the PC and a monochrome monitor. It holds four images of
256 x 256 pixels with 8 bits (256 grey levels) per pixel. Each image plane is
built from dual-port video RAM (VRAM). Such a chip has an ordinary DRAM array
(the *RAM section*) and a 256-entry shift register (the *SAM*, serial access
memory). One *transfer cycle* copies a whole RAM row into the SAM, or the SAM
into a row. The board uses that split throughout:

* **Capture.** The camera shifts each line straight into the SAM of the
  *write plane* at up to 15 MB/s. After each line, a *write transfer* stores
  the SAM in the RAM row for that line.
* **Display.** Before each TV line, a *display transfer* loads one row of the
  *display plane* into its SAM. The SAM is then shifted out at 7.5 MHz to a
  9-bit video DAC.
* **PC access.** The *memory plane* appears in PC memory as one 64 KB window
  (byte offset = row x 256 + column). The PC is held in wait states while its
  access runs as a normal DRAM cycle.
* **Refresh** fills the free cycles.

So the RAM section needs only one short cycle per camera line, per TV line
or per PC byte, and the pixel streams never touch it. The control logic in
this repository does the arbitration and sequencing of those cycles. It also
handles the PC bus interface, the camera handshake and the display path. A
second, 1-bit *service (cursor) layer* is overlaid on the image. It is drawn
by an NEC uPD7220A graphics display controller (GDC), which also makes the
video timing.

The VRAM chips (two Fujitsu MB81461 per plane) and the GDC are bought parts.
They are not in `rtl/`: their pins are ports of the top module `fs4_top`.
`tb/` has a behavioural VRAM model for simulation.

## Block structure

```
 PC bus ──> pc_interface ──ISR──────────────────────────────┐
              │ mem_req / wait        ┌─────────────┐       │
 camera ──> camera_ctrl ──wr_req────> │ request_reg │       │
              │ line clr/inc          └─────┬───────┘       v
              v                     priority_decoder   vram_plane_sel ──> RAS/CAS/SC per plane
          line_counter ─┐                   │                ^   └─> displayed pixel ─> video_dac
 GDC  ──> display_ctrl ─┼─ disp_req ──> cycle_generator ─────┘             ^
              │         └─────────────> adr_mux ──> VRAM address           │
 GDC  ──> cursor_sram ──> video_serializer ── cursor bit ──────────────────┘
 clk 15 MHz ──> clock_gen (slot phase, 7.5 MHz pixel clock)
```

| module | role |
|---|---|
| `fs4_pkg` | operation codes (in priority order), request vector, VRAM strobe bundle, control-word layout |
| `clock_gen` | 8-phase memory-cycle slot (1.875 MHz) and 7.5 MHz pixel clock, both from 15 MHz |
| `request_reg` | holds the four requests until they are served; issues periodic refresh requests |
| `priority_decoder` | picks write transfer > PC access > display transfer > refresh |
| `cycle_generator` | runs one cycle per slot and decodes RAS, CAS, ROW, TR/OE, WE and the data-latch and done strobes |
| `adr_mux` | address source for each cycle type, row/column multiplexing |
| `vram_plane_sel` | plane enables from a 256 x 4 PROM table; routes shift clocks; selects the video plane |
| `line_counter` | RAM row for camera line n |
| `camera_ctrl` | EFV/ELV/EDV handshake, write-transfer requests, frame-busy status |
| `display_ctrl` | display-transfer request and row at HSYNC, SAM shift clock, mixed sync |
| `cursor_sram` | 16K x 8 service-layer memory (two 256 x 256 1-bit layers) |
| `video_serializer` | cursor bytes to a serial cursor bit at the pixel rate |
| `video_dac` | behavioural model of the 9-bit video DAC (analog output as `real`) |
| `pc_interface` | I/O-port and memory-window decoding, control and status registers, GDC strobes, IOCHRDY |
| `fs4_top` | wires all of the above; brings out the VRAM, GDC, PC, camera and video pins |

## The memory-cycle slot and the arbiter

This is the core of the design. Everything on the board runs from one 15 MHz
clock. The VRAM is cycled at 1.875 MHz, which is 15 MHz / 8. In this RTL,
1.875 MHz is not a separate clock. `clock_gen` counts `phase` 0..7, and one
pass through the eight phases is a **slot**. Each slot runs at most one VRAM
cycle. The cycle always fits inside the slot, so RAS and CAS are high at
every slot boundary (`cycle_generator` asserts this).

**Requests.** Four sources raise one-clock request pulses:

* `camera_ctrl`: a write transfer.
* `pc_interface`: a PC access.
* `display_ctrl`: a display transfer.
* The refresh timer inside `request_reg`.

`request_reg` keeps each request until it is acknowledged. If a new request
arrives in the same clock as the acknowledge of the old one, it is kept.

**Choosing.** On the last clock of a slot (`slot_end`),
`priority_decoder` picks the most urgent pending request, and
`cycle_generator` acknowledges it and runs it in the next slot. The priority
order is:

1. the cycle already running, which is never cut short;
2. write transfer, because the camera cannot wait;
3. PC access;
4. display transfer, which is requested at the start of HSYNC, well before
   the active part of the line, so a delay does not show;
5. refresh.

Refresh has the lowest priority, so it is requested more often than the DRAM
needs: every `REFRESH_SLOTS` = 16 slots (8.5 us). A typical limit is 256 rows
in 4 ms, i.e. 15.6 us per row. In the end-to-end test the longest gap
between refreshes is 144 clocks (9.6 us).

**Worst-case latency.** A request waits for the slot in progress to end and
for the requests above it. A write transfer therefore starts at most two slots
(16 clocks, 1.07 us) after its request. The end-to-end test measures 13
clocks from the end of ELV to the fall of RAS.

**Strobe patterns.** `cycle_generator` decodes (operation, phase) into the
VRAM strobes, the way the FPLA on the original board does. The result goes
through output registers, so each value appears one clock after the phase it
is decoded in. Table (0 = asserted for the active-low strobes):

| decoded in phase | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| ROW (1 = row address) | 1 | 1 | 0 | 0 | 0 | 0 | 1 | 1 |
| RAS_n | 1 | 0 | 0 | 0 | 0 | 0 | 1 | 1 |
| CAS_n | 1 | 1 | 1 | 0 | 0 | 0 | 1 | 1 |
| TR/OE_n, write or display transfer | 0 | 0 | 0 | 1 | 1 | 1 | 1 | 1 |
| WE_n, write transfer | 0 | 0 | 0 | 1 | 1 | 1 | 1 | 1 |
| WE_n, PC write (early write) | 1 | 1 | 0 | 0 | 0 | 0 | 1 | 1 |
| TR/OE_n, PC read (output enable) | 1 | 1 | 1 | 0 | 0 | 0 | 1 | 1 |

* `rd_latch` is decoded in phase 5 of a PC read and `mem_done` in phase 6
  of any PC access.
* TR/OE low when RAS falls selects a transfer. WE then selects the
  direction: low means SAM to RAM (write transfer), high means RAM to SAM
  (display transfer).
* Refresh is CAS-before-RAS: CAS is low in phases 0-4 and RAS in phases 1-5,
  so the chip uses its own row counter and no address is needed.
* Transfers use column 0 as the SAM start position.

**Plane selection.** `vram_plane_sel` gates RAS and CAS per plane with a
4-bit enable read from a 256-entry table. The table is indexed by
`{operation, MP, DP, WP}` and stands in for the 74S287 PROM of the original
board. The enables are:

| operation | plane enabled |
|---|---|
| PC access | MP |
| write transfer | WP |
| display transfer | DP |
| refresh | all four |

TR/OE, WE and the address are shared by all planes.

## Capturing a camera frame

The digitizer connector carries 8 data bits and three strobes:

* EFV (frame valid): active for the whole frame.
* ELV (line valid): active for the 256 pixels of one line.
* EDV (data valid): one pulse per pixel.

`camera_ctrl` synchronises EFV and ELV with two flip-flops each. A frame is
captured like this:

1. **EFV rises.** A write transfer is requested at once. Its data is
   meaningless. Its purpose is to switch the SAM of the write plane from
   output to input mode. `line_counter` is set to 255, so this dummy
   transfer lands in row 255, which the last line of the frame overwrites.
2. **ELV rises.** The line counter advances, so line n goes to row n.
3. **While ELV is high,** each EDV pulse *is* the SAM shift clock of the
   write plane (`vram_sc[WP]`), and it pushes the pixel on `cam_sd` into the
   SAM. EDV is not synchronised, which lets the shift rate exceed anything
   the 15 MHz logic could sample.
4. **ELV falls.** A write transfer copies the SAM into the row. The next
   line must not start before this transfer has run, i.e. within 1.07 us.
5. **EFV falls.** Bit 0 of the output status buffer (OSB) goes back to 0.
   Software polls this bit to learn that the frame is complete.

If the write plane and the display plane are the same plane during a
capture, the camera gets the shift clock and the picture on that plane is
not shown.

## PC interface

The board occupies four adjacent I/O ports at `IO_BASE` (default 0x300) and
one 64 KB memory window at segment `MEM_SEG` (default 0xD, i.e. D0000-DFFFF).
On the original board both are set by jumpers; here they are parameters. The
port assignment is this design's own:

| port | read | write |
|---|---|---|
| base+0 | GDC status | GDC parameter |
| base+1 | GDC data (FIFO) | GDC command |
| base+2 | OSB (bit 0 = frame in progress) | control word (ISR) |
| base+3 | – | – |

Control word (ISR), as on the original board:

| bit | 7 | 6 | 5 | 4 | 3 | 2 | 1 | 0 |
|---|---|---|---|---|---|---|---|---|
| field | WP1 | WP0 | DP1 | DP0 | MP1 | MP0 | – | – |

* WP: plane written by the camera.
* DP: plane displayed.
* MP: plane seen in the PC memory window.

**Memory access.** A read or write in the window pulls IOCHRDY low
combinationally, within the same bus cycle. One PC access request is raised
after the strobe has been synchronised. IOCHRDY is released when the cycle
generator reports the end of the cycle. Read data is latched during the
cycle and driven until the PC drops MEMR. In the end-to-end test the
longest wait is 27 clocks (1.8 us).

The GDC strobes are plain combinational decodes of IOR/IOW, with A0 passed
through.

## Display path and service layer

The GDC (external) runs the video timing and scans the 16K x 8
`cursor_sram`. One 256-pixel line is 32 bytes of that memory, so:

* GDC word-address bits 12..5 are the line number;
* bit 13 selects one of the two 256 x 256 layers.

At the rising edge of HSYNC, `display_ctrl` latches that line number as the
row for a display transfer and requests the transfer. While BLANK is low,
the display plane's SAM is shifted at 7.5 MHz (`vram_sc[DP]`), and
`video_serializer` shifts the current cursor byte out MSB first, one byte
per 8 pixels.

`video_dac` converts the 9-bit code `{cursor, pixel}` to a voltage:

| condition | output |
|---|---|
| sync | 0 V |
| blanking | 0.3 V |
| active video | 0.3 V + 0.7 V x code / 511 |

Putting the cursor bit in the MSB makes a cursor pixel brighter than any
image pixel. Mixed sync is HSYNC OR VSYNC.

The row-from-address mapping assumes the GDC is set up for 256-pixel lines.
A service layer of another shape (such as 384 x 256) needs a matching GDC
set-up, and the display-transfer row would have to come from elsewhere.

## Top-level pins

Bidirectional buses are split into separate in, out and enable ports:

* PC data: `pc_d_in`, `pc_d_out`, `pc_d_oe`.
* VRAM RAM-port data: `vram_qd_out` goes to the chips; `vram_qd_in[p]` comes
  from plane p.
* VRAM SAM outputs: `vram_sd_in[p]`.

Per plane: `vram_ras_n`, `vram_cas_n`, `vram_sc`, `vram_se_n`. Shared:
`vram_troe_n`, `vram_we_n`, the 8-bit multiplexed address `vram_a`, and the
camera data `cam_sd`.

The GDC is assumed to be clocked from the same 15 MHz clock. Its HSYNC,
VSYNC, BLANK and word address are inputs; the cursor-memory write port
(`gdc_mem_we_n`, `gdc_mem_wdata`) and read data (`gdc_mem_rdata`) face it.

`video_out` is a `real`, because the DAC is a behavioural model.

## What follows the original board and what is assumed

Taken from the original FS-4 module:

* four 256 x 256 x 8 planes of dual-port VRAM;
* the four cycle types, their priority order and their address sources;
* 1.875 MHz cycle rate, 7.5 MHz display shift, camera rate up to 15 MB/s;
* the dummy write transfer at frame start and a write transfer at each line
  end;
* the line counter driven by ELV;
* the control-word layout and OSB bit 0;
* four I/O ports and a 64 KB window, both jumper-selectable;
* IOCHRDY wait states;
* a 16K x 8 service-layer memory scanned by a uPD7220A;
* a 9-bit DAC fed by the pixel and the cursor bit;
* a 74S287 PROM distributing the strobes to the planes.

This design's own choices:

* the phase-by-phase strobe table;
* synchronous request latching, after two-flip-flop synchronisers;
* the refresh interval;
* the port numbering;
* pixel (x, y) stored at row y, column x;
* SAM start column 0;
* line counter preset to 255;
* display transfers requested at HSYNC, with the row from GDC address bits
  12..5;
* the PROM address layout;
* shift-clock steering when WP = DP;
* MSB-first cursor bytes;
* the DAC code layout and voltage levels.

The PC interface re-arms one to two clocks (at most 133 ns) after a memory
strobe ends. That is shorter than the idle time between two PC bus
cycles, so every access gets its own wait state.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
          rtl/fs4_pkg.sv tb/tb_fs4_top.sv --top-module tb_fs4_top -o sim
./obj_dir/sim
```

Replace `fs4_top` with any module name to run its unit test.

`tb_fs4_top` runs the whole board at its default parameters in about two
seconds of CPU time. It attaches four `tb/vram_model.sv` planes and plays
the PC, the camera and the GDC. The test:

1. Writes the control word and fills rows 0-7 of plane 2 from the PC.
2. Captures a full 256 x 256 frame into plane 1 at 15 MB/s, while the PC
   writes plane 2 and polls OSB.
3. Reads all 65536 captured bytes back through the PC window.
4. Checks eight displayed lines at the SAM output, the cursor bit stream
   and every DAC sample.
5. Switches the display page to the captured plane and checks that eight
   lines of the camera image come out of its SAM. That plane's SAM was left
   in input mode by the capture; the first display transfer turns it back
   to output mode.

It counts each mechanism and fails if one never happens. The mechanisms are:

* the dummy and per-line write transfers (exactly 257);
* display transfers, before and after a display-page switch;
* refresh on all planes;
* PC reads and writes with wait states;
* request conflicts resolved by priority.

It also checks the write-transfer latency, the refresh gap and the maximum
PC wait.

The unit tests cover:

| testbench | what it checks |
|---|---|
| `tb_cycle_generator` | every strobe of every cycle type, phase by phase |
| `tb_priority_decoder` | all 16 request combinations |
| `tb_vram_plane_sel` | random control words and operations |
| `tb_pc_interface` | bus cycles against a modelled memory cycle |
| `tb_camera_ctrl` | a short frame |
| other unit testbenches | the remaining modules in the same way |

## Changing the design

* `IO_BASE`, `MEM_SEG` (`pc_interface`, `fs4_top`): the jumper settings.
* `REFRESH_SLOTS` (`request_reg`, `fs4_top`): refresh request interval in
  slots.
* `W` (`line_counter`): line-counter width.
* `WORDS` (`cursor_sram`): service-layer memory size.
* The cycle strobe table is the `always_comb` block in `cycle_generator.sv`.
  Keep RAS and CAS idle in phase 7 so cycles never cross a slot boundary.
