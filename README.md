# ICAI — Image Combiner and Acquisition Interface

A push-broom camera for remote sensing builds a two-dimensional picture one
ground line at a time, as the satellite moves over the scene. To get a very
wide line, several CMOS line sensors are laid end to end. Packaged sensors
cannot touch, so they are staggered in two rows: the lower row (sensors A
and C) and the upper row (B and D) overlap slightly and are offset by one
line pitch. At any instant the two rows look at two different ground lines.

The ICAI is the chip that sits between one group of four such sensors and a
host computer. It

* strobes the sensors once every line period and samples their pixels,
* re-pairs the two rows in an on-chip memory, so that the upper-row pixels
  of exposure *t+1* are put next to the lower-row pixels of exposure *t*,
* hands the host a straight image line of 4 x 704 = 2,816 pixels every line
  period, framed with a line number and an end-of-line or end-of-file mark.

A full camera uses sixteen sensors, four ICAIs and one host computer; this
RTL is one ICAI. The published chip ran at 8 MHz, which with a 1000-cycle
line period gives 8,000 lines per second.

## The re-pairing problem

All four sensors are exposed together, so acquisition *t* delivers
A(t), B(t), C(t), D(t) on the 32-bit sensor bus Pdata (A in bits 31:24, B in
23:16, C in 15:8, D in 7:0). The picture the host wants has, as its line
*t*,

    A(t)  B(t+1)  C(t)  D(t+1)

so the lower-row half of a line must wait one line period for its upper-row
half. A line is complete only after the following acquisition, and it is
sent out in the period after that.

## The memory and its four-stage rotation

The combiner memory is sixteen single-port 704 x 8 blocks (11,264 bytes),
grouped into four banks; bank *k* is blocks 4k .. 4k+3, and block 4k+j holds
sensor j (A=0 .. D=3) of one finished line. The combiner steps through four
stages, one per line period, and in stage *s*:

* **write-in:** A and C of the incoming acquisition go to bank *s*
  (blocks 4s, 4s+2), B and D go to bank *s-1 mod 4* (blocks 4(s-1)+1,
  4(s-1)+3);
* **read-out:** bank *s+2 mod 4* is read, one word of four pixels (one per
  sensor, same pixel index) per cycle.

| stage | A ->    | B ->    | C ->    | D ->    | bank read |
|-------|---------|---------|---------|---------|-----------|
| 0     | block0  | block13 | block2  | block15 | bank 2 (8-11)  |
| 1     | block4  | block1  | block6  | block3  | bank 3 (12-15) |
| 2     | block8  | block5  | block10 | block7  | bank 0 (0-3)   |
| 3     | block12 | block9  | block14 | block11 | bank 1 (4-7)   |

Follow bank 0: in stage 0 it receives A(1) and C(1); in stage 1 it receives
B(2) and D(2) and is now a complete line; in stage 2 it is read out; in
stage 3 it is idle, and in the next stage 0 it is filled again. Because a
block is never read and written in the same stage, each single-port block
needs only one address, switched between the write and read paths.

The write side (`write_in_logic`) is four 1-to-4 demultiplexers with
registered outputs, so a pixel reaches its block one cycle after it was
sampled. The read side (`read_out_logic`) is four 4-to-1 multiplexers of the
block outputs. Both are driven by a 2-bit stage index; the input and output
stage registers always carry the same value.

## Line timing

Everything is timed by the ICAI counter, which counts 0..999 and wraps: one
wrap is one line period and one combiner stage.

* **Count 0:** in a period that acquires a line, Strobe is high for one
  cycle. The sensors then spend 247 cycles storing their exposure and output
  704 pixels, one per cycle. The sensor's gain stage and ADC add a latency DL
  (0..15 cycles, programmable), so pixel *k* arrives on Pdata at count
  247 + DL + k.
* **Counts 247+DL .. 950+DL:** the IS control state machine is in ACQUIRE
  and writes the 704 words into the memory.
* **Counts 247+DL .. 952+DL:** in a period that sends a line, HREADY is
  high for 706 cycles: 704 pixel words, the line index, then EOL (or EOF for
  the last line). The memory read address runs two cycles ahead of HRWDATA
  (one cycle of SRAM latency, one output register).

Acquisition and output overlap in time but use different banks.

## Host protocol

The host bus has HSELx, HTRANS, HWRITE, a 32-bit bidirectional HRWDATA and
HREADY. The state of the ICAI is decoded every cycle:

| HSELx | HTRANS | HWRITE | state         |
|-------|--------|--------|---------------|
| 1     | 1      | 1      | Configuration |
| 1     | 1      | 0      | Read Image    |
| 1     | 0      | 1      | Idle          |
| 1     | 0      | 0      | Reserved      |
| 0     | -      | -      | Disable       |

**Configuration.** In a cycle in the Configuration state the word on HRWDATA
is stored:

| bits  | register            | meaning                                   |
|-------|---------------------|-------------------------------------------|
| 31:7  | `reg_qustedrowx704` | image height N; the image has 704 x N lines |
| 6:4   | `reg_pga`           | gain code, sent to the sensors on PGA[2:0]  |
| 3:0   | `reg_sample_delays` | DL, the sensor gain + ADC latency in cycles |

**Reading an image.** The host holds the Read Image state. At the next wrap
of the counter the ICAI starts counting periods p = 0, 1, 2, ...

| period p       | what happens                                              |
|----------------|-----------------------------------------------------------|
| 0              | the configuration word is returned (706 cycles of HREADY) |
| 1 .. 704N+1    | a line is acquired, in combiner stage (p-1) mod 4          |
| 1, 2           | nothing is sent                                           |
| 3 .. 704N+2    | line p-2 is sent                                          |

So the first image line leaves 3000 cycles after the configuration word and
the rest follow every 1000 cycles. After EOF the ICAI waits for the host to
leave Read Image. If the host leaves Read Image early, the image is
abandoned: strobes and output stop at once.

**Packet.** Words 0..703 are `{A[k], B[k], C[k], D[k]}` of the combined line
(pixel k of each sensor, A in the top byte). Word 704 is the line index,
counting from 1 (low 32 bits). Word 705 is `32'h454F4C0A` ("EOL") or, on
the last line, `32'h454F460A` ("EOF"). HRWDATA is driven (`hrdata_oe`) only
while HREADY is high.

## Files and hierarchy

    icai                 chip top (rtl/icai.sv)
    ├─ is_control        ICAI counter, strobe, IDLE/ACQUIRE machine
    ├─ image_combiner    memory and the stage rotation
    │  ├─ write_in_logic
    │  ├─ sram_sp x16    704 x 8 single-port blocks
    │  └─ read_out_logic
    └─ host_interface    decode, registers, read sequence, packets
    icai_pkg             constants, mode enum, configuration struct

The top's ports are the chip's pins, except that HRWDATA is split into
`hwdata` (in), `hrdata` (out) and `hrdata_oe`; the bidirectional pad joins
them. Top parameters `PER` (1000), `TST` (247) and `NP` (704) set the line
period, sensor store time and line length; the default values are those of
the published chip, and the testbench of `host_interface` uses a smaller
geometry (100 / 20 / 16) to show they can be changed.

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/iisl_model.sv` models four sensors
(store / output / idle sequence, strobe-started, settable ADC latency) and
`tb/tb_pix_pkg.sv` generates their test image. For example, the end-to-end
test:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/icai_pkg.sv tb/tb_pix_pkg.sv tb/tb_icai.sv --top-module tb_icai
    ./obj_dir/Vtb_icai

`tb_icai` runs the chip at its full size. It configures it, reads a whole
704-line image with DL = 3, then starts two more images (DL = 0 and DL = 15)
and abandons them. It checks every output word against an independently
computed image, the 3000-cycle first-line latency, the 1000-cycle line
spacing and 706-cycle packets, that configuration is ignored while disabled,
and that every combiner stage, EOL, EOF and abandoning occurred. It takes
about a second. `tb_iss` builds the whole camera: four ICAIs, each with its
own host bus and its own group of four modelled sensors, read together for
one 704-line image of 16 x 704 = 11,264-pixel ground lines, every pixel
checked. The unit tests cover the SRAM, both multiplexers (every
table entry), the combiner over ten line periods, the control counter and
state machine for all DL values used, and the host interface sequence.

## What is the published design and what is not

Taken from the published chip: the three-part architecture, the 704-pixel /
four-sensor / 8-bit geometry, the 1000-cycle period and 247-cycle store
time, the DL-shifted acquisition window, the sixteen-block four-bank memory
and its complete write-in and read-out tables, the command table, the three
registers and their widths, the 706-word packet and its content, the
configuration echo and the 3000-cycle latency, and the pin list.

Choices made here, where the published description is silent:

* the bit positions of the three register fields (the field order and
  widths are published, the exact bits are not);
* the codes used for EOL and EOF, and the line index counting from 1;
* the configuration echo filling the whole 706-cycle window;
* a read starting at the next counter wrap; the counter free-runs from
  reset; Strobe is a one-cycle pulse at count 0;
* abandoning an image when the host leaves Read Image, and waiting after EOF
  until it does;
* one-cycle SRAM read latency, registered write path, and an asynchronous
  active-low reset that clears all registers.

Assertions in the RTL state the rules the sequencing relies on: no SRAM
block is read and written in the same cycle, both stage indexes agree, the
combiner is read only in a line period, HREADY is raised only in Read
Image, and Strobe comes only while the acquisition machine is idle.

Not included: the sensors themselves (mixed-signal parts, only modelled in
the testbench), the host computer, the pad ring and the board-level system
of four ICAIs. The SRAM blocks are written as register arrays; a
synthesized chip would map them to foundry single-port macros with the same
interface.
