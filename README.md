# Custom-instruction acceleration for histogram equalization and sharpening on a Nios II system

Histogram equalization and Laplacian sharpening are cheap per pixel, but the
per-pixel work is repeated for every pixel of every frame. On a small soft
processor, three short steps dominate:

- clearing a 256-entry histogram table,
- incrementing the table entry addressed by each pixel,
- clamping each filtered pixel back into 0..255.

Each of these is a handful of loads, stores, compares and branches, with the
table sitting in SDRAM. This design moves each step into a **custom
instruction**: a small hardware unit wired beside the Nios II ALU that the
processor invokes like an ordinary instruction. The rest of the algorithm
stays in software. The processed frame goes to an SRAM frame buffer, and a
display controller scans it out to a VGA DAC.

The RTL here contains the hardware that belongs to this design:

| unit | module | what it does |
|---|---|---|
| SAT instruction | `sat_ci` | clamps a signed 16-bit pixel to 0..255, combinational |
| histogram instruction | `hist_ci` (+ `hist_lut`) | CLR_HIST / INC_HIST / GET_HIST on a 256-bin table in block RAM |
| display controller | `display_controller` | VGA raster, HSYNC/VSYNC, continuous frame-buffer readout |
| top | `nios_image_soc` | the three units above, with the processor, frame buffer and DAC as ports |

The surrounding system has these parts:

- a Nios II processor with separate instruction and data masters,
- an Avalon system bus,
- SDRAM for the program, stack and intermediate images,
- external SRAM used as the frame buffer,
- on-chip memory and a JTAG UART,
- LEDs for debug checkpoints and a reset switch.

These are vendor IP or board parts. They are not in the RTL, and their
connections come out as ports of `nios_image_soc`.

## The software the instructions serve

Histogram equalization maps grey level *k* to
`s_k = (L-1) * sum_{j<=k} n_j / N`. Here `n_j` is the number of pixels at
level *j*, *N* is the pixel count and *L* = 256. The processor:

1. clears the 256 bins,
2. runs INC_HIST once per pixel,
3. reads the bins back with GET_HIST,
4. forms the cumulative sum and remaps the image.

Sharpening subtracts the Laplacian:

    g(x,y) = f(x,y) - lap f(x,y) = 5 f(x,y) - f(x+1,y) - f(x-1,y) - f(x,y+1) - f(x,y-1)

Pixels outside the image count as zero. For 8-bit *f*, *g* lies in
-1020..1275, so every result goes through SAT before it is stored as a
byte. The end-to-end testbench performs exactly this sequence.

## SAT: the saturation instruction (`sat_ci`)

The operand's low 16 bits are read as a signed pixel *P*. The datapath has
two flags and two muxes:

- a signed comparator flags `P > 255`,
- the sign bit flags `P < 0`,
- mux 1 selects 255 if the comparator fired, otherwise 0,
- mux 2 selects mux 1's value if either flag is set, otherwise *P*.

The result is zero-extended to 32 bits. The unit is purely combinational,
so it is a single-cycle Nios II custom instruction. In software the same
clamp costs about nine instructions.

Examples: 300 gives 255, 58 gives 58, and -134 gives 0. The comparison must
be signed; an unsigned compare would turn -134 into 255.

Ports: `dataa[31:0]` in, `result[31:0]` out. The second operand of the
custom-instruction interface is not used.

## Histogram instruction (`hist_ci`, `hist_lut`)

This is the most involved part. The histogram table is a 256 x 19-bit
single-port block RAM (`hist_lut`). It has one address for reading and
writing, a synchronous write, and a **registered read**: Q shows the entry
addressed one clock earlier. A read of the entry being written returns the
old value.

The 19-bit counter width comes from the implementation's reported 4864 RAM
bits (256 x 19). One unit serves three opcodes, selected by `n`. The
operand `dataa[7:0]` is the bin, i.e. the pixel value.

| n | instruction | effect | cycles (start cycle included) |
|---|---|---|---|
| 000 | CLR_HIST(a) | bin[a] = 0 | 2 |
| 001 | INC_HIST(a) | bin[a] = bin[a] + 1 | 4 |
| 010 | GET_HIST(a) | result = bin[a] | 2 |

### Datapath and control

`start` and `n` each pass through a chain of registers (`start_1d`,
`start_2d`, `start_3d` and the same for `n`). The datapath has three muxes
and an adder:

- **Write enable** is high when either of these holds:
  - `start` is high with `n = CLR` (the clear happens in the start cycle), or
  - `start_2d` is high with `n_2d = INC` (the write-back of an increment).
- **Write data** is 0 for a clear. Otherwise it is `Q + 1`, from the adder
  on the RAM output.
- **Address** is normally the live `dataa[7:0]`. INC saves its address in
  a register in its start cycle. The mux switches to that saved address in
  the write-back cycle (`start_2d` with `n_2d = INC`).
- **result** is always the RAM output Q, zero-extended.
- **done** is raised in two cases:
  - one cycle after start, for CLR, GET and any unused opcode,
  - three cycles after start, for INC (from `start_3d` / `n_3d`).

### INC_HIST cycle by cycle

| cycle | what happens |
|---|---|
| 0 | `start`, `n = 001`; the address register captures `dataa[7:0]`; the RAM registers the read of bin[a] |
| 1 | Q = bin[a]; the RAM reads the live address again (still *a*) |
| 2 | `start_2d`: the address mux picks the saved address; bin[a] <= Q + 1 at the closing edge |
| 3 | `done` |

GET works the same way, but ends after cycle 1, when Q already holds bin[a].
The next instruction may start in the cycle after `done`. Because the write
lands before then, back-to-back increments of the same bin are exact.

### Interface rules and clock enable

The operand must stay stable from `start` until `done`. The Nios II holds
its operands while a multi-cycle custom instruction runs, and the read in
cycles 0–1 uses the live operand.

`clk_en` (the processor's custom-instruction clock enable) freezes the
register chains and blocks the RAM write. An instruction therefore
completes correctly, just later, when `clk_en` drops in the middle of it.
`done` only counts in a cycle where `clk_en` is high. `reset` is
synchronous and clears the control registers, not the table. Software
clears the table with CLR_HIST, which is the first step of the algorithm
anyway.

Bins wrap at 2^19 = 524,288 counts. That is far above the 25,344 pixels of
a QCIF frame. A frame with more than 524,287 pixels of one grey level
would wrap.

## Display controller (`display_controller`)

The frame buffer lives in external SRAM, so the display never waits for
the processor. The controller reads it continuously and drives the DAC:

- **Raster.** Horizontal and vertical counters generate the raster, with
  active-low HSYNC/VSYNC and a visible-area flag (`vga_blank_n`). The
  default timing is 640x480 at 60 Hz: 800 x 525 clocks per frame at a
  25 MHz pixel clock.
- **Readout.** The image is 176 x 144 (QCIF) at the top-left corner. For
  each raster position inside it, `fb_addr = y*176 + x` goes out. The grey
  byte returns on `fb_rdata` one clock later.
- **Output.** The byte drives R, G and B together. The rest of the screen
  is black.
- **Latency.** Every `vga_*` output is registered and lags the raster
  counters by exactly two clocks: one for the SRAM read and one for the
  output register. Syncs and pixels stay aligned.

All timing numbers are parameters: `H_ACTIVE`, `H_FP`, `H_SYNC`, `H_BP`,
the matching `V_*` set, `IMG_W` and `IMG_H`.

## Top level (`nios_image_soc`)

The top has one port group per outside partner:

| ports | partner |
|---|---|
| `sat_dataa`, `sat_result` | Nios II custom-instruction port of the SAT unit |
| `hist_clk_en`, `hist_start`, `hist_n`, `hist_dataa`, `hist_result`, `hist_done` | Nios II custom-instruction port of the histogram unit |
| `fb_addr[14:0]`, `fb_rdata[7:0]` | frame-buffer SRAM read port (data one clock after the address) |
| `vga_hsync`, `vga_vsync`, `vga_blank_n`, `vga_r/g/b[7:0]` | VGA DAC |
| `clk`, `reset` | system/pixel clock; synchronous active-high reset from a switch |

Parameters are `IMG_W = 176`, `IMG_H = 144` and `COUNT_W = 19`.
`ci_pkg` holds the opcode enum `hist_op_e` and the constants 255 and 256.

## Performance: instructions versus clock cycles

The reported per-pixel gains count instructions at one cycle each:

| step | software | with custom instruction |
|---|---|---|
| histogram clear, per bin | 18 | 1 |
| histogram increment, per pixel | 57 | 1 |
| saturation, per pixel | 9 | 1 |

In this hardware, INC_HIST occupies the processor for 4 clocks and
CLR/GET for 2. One QCIF frame therefore takes:

| step | instructions | clocks |
|---|---|---|
| clear | 256 | 512 |
| count | 25,344 | 101,376 |

Both figures are measured in the end-to-end test. The software increment
also hits SDRAM at three or more cycles per access, so the speed-up is
still large, but smaller than the instruction ratio alone suggests.
SAT costs one clock per pixel.

## Departures and design choices

The following parts have no printed specification; the choices here are
this design's own:

- **GET_HIST opcode.** It is 010. Only 000 (CLR) and 001 (INC) have
  known codes.
- **`done` output.** The histogram unit has a `done` output and a third
  delay stage to drive it. The 2- and 4-cycle lengths are from the
  original design; the handshake is added so the unit works as a
  variable-length multi-cycle instruction. This makes the unit a few
  registers larger than the 14 reported for the original.
- **`clk_en` gating.** `clk_en` gates the register chains and the RAM
  write.
- **Display controller.** It is this design's own: only its function is
  known. That covers the VGA timing, 8-bit grey pixels and the image
  placement. It also reads the SRAM through a direct one-clock-latency
  port instead of as a second master on the system bus, so the arbitration
  between processor and display is left out.
- **Counter width.** The 19-bit width is inferred from the reported RAM
  size, not stated directly.

## How far to trust it

Every unit has a self-checking testbench that compares against values
computed in the testbench itself.

- `tb_sat_ci` applies all 65,536 operand values.
- `tb_hist_lut` runs random read/write traffic against a reference array.
- `tb_hist_ci` checks:
  - all three opcodes with a reference histogram,
  - instruction lengths,
  - back-to-back increments of one bin,
  - `clk_en` stalls in the middle of instructions.
- `tb_display_controller` checks every output of two full frames against
  the expected raster, plus sync pulse counts.
- `tb_nios_image_soc` runs one complete frame at the default sizes:
  1. clears, counts and reads back the histogram of a generated 176x144
     image,
  2. equalizes and sharpens it in the testbench,
  3. clamps all 25,344 pixels through SAT,
  4. writes them to a frame-buffer model,
  5. checks a full displayed frame pixel by pixel.

  It also counts that each mechanism occurs: every opcode, stalls, all
  three SAT cases, syncs, image and border pixels.

All of these pass. The units have not been run against a real Nios II or
on an FPGA. The custom-instruction handshake follows the usual Nios II
multi-cycle convention, as described above.

## Simulating

Each testbench is self-contained. It prints
`TB_RESULT checks=<n> failures=<m>` and stops, and a watchdog ends a hung
run. With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_nios_image_soc rtl/ci_pkg.sv tb/tb_nios_image_soc.sv
    ./obj_dir/Vtb_nios_image_soc

Replace the top module name to run `tb_sat_ci`, `tb_hist_lut`, `tb_hist_ci`
or `tb_display_controller`. Each runs in about a second. The package
`ci_pkg.sv` must be listed first.
