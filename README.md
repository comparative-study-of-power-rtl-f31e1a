# Greyscale morphology IP (erosion / dilation) for an Avalon-MM system

This is a small image-processing accelerator for grey-level mathematical
morphology. Given an 8-bit image and a square binary structuring element
(the *mask*) of up to 23x23, it computes, for every position of the mask, the
minimum (erosion) or maximum (dilation) of the image pixels under the mask's
set bits. It was conceived as a coprocessor for a soft processor on an FPGA,
where morphological filtering dominates the segmentation step of an iris
recognition pipeline. It trades speed for area: instead of buffering whole
image lines on chip, it keeps only one a x a window and lets the host send
pixels more than once.

The IP sits on an Avalon-MM bus with two ports:

* an **Avalon slave**, through which software writes the mask and run
  parameters and through which a DMA streams the image pixels, and
* an **Avalon master**, through which the IP writes its results straight into
  system memory, raising an interrupt after the last one.

Power was a main concern of the design. Its clocks are split into
software-switchable gated domains, and an optional packing buffer turns four
8-bit result writes into one 32-bit bus transfer.

## The scan order: how the image has to be sent

Read this first. The IP does not buffer image rows, so the host must send the
pixels in a fixed order. For a w x l image (w wide, l high) and mask size a:

```
for c in 0 .. w-a                  -- horizontal mask position (column pass)
    for r in 0 .. l-1              -- every image row, top to bottom
        for j in 0 .. a-1          -- the a pixels of the strip, left to right
            write PIXEL <- image[r][c+j]
```

Each group of `a` writes forms one **line**: row `r` of the vertical strip of
columns `c .. c+a-1`. A column pass sends the strip from top to bottom, which
moves the mask down the image. After the last row the strip moves one pixel
to the right and the next pass starts again at row 0. Pixels are therefore
sent up to `a` times each: `(w-a+1) * l * a` writes per image. For the
reference case (202 x 202, a = 23) that is 180 * 202 * 23 = 836,280 writes,
against 40,804 pixels in the image.

Inside a column pass, the kernel has a complete a x a window once `a` lines
have arrived, and from then on gives one result per line. Results exist only
for window positions that lie entirely inside the image. There is no border
padding, so a run gives `(w-a+1) * (l-a+1)` results: 180 x 180 = 32,400 for
the reference case. The result for the window whose top-left pixel is
`(row r, column c)` is

```
erosion : min { image[r+i][c+j] : 0 <= i,j < a, MASK_ROW[i] bit j set }
dilation: max { ... same set ... }
```

An empty mask gives 255 (erosion) or 0 (dilation). Mask bits in rows or
columns `>= a` are ignored, so a smaller mask can be used without clearing
the rest of the mask memory.

**Result layout.** Result number `n` (counted in production order: column
pass by column pass, top to bottom inside a pass) is written to byte address
`DEST + n`. The result image is thus stored **column-major**:
`DEST + c*(l-a+1) + r`. Storing results in production order lets four
consecutive results share one 32-bit word.

## Hardware structure

```
            +--------------------------------------------------------------+
 Avalon     |  morph_slave_ctrl (always-on clock)                          |
 slave  ----+-> CTRL/STATUS, clock enables, IRQ, pixel strobe, stall       |
            |      | param writes             | pixels                     |
            |      v                          v                            |
            |  morph_param_memory        morph_pixel_fifo  --line(23x8)--> |
            |  (gated mem clock)         (gated proc clock)                |
            |   mask 23x23 -----------------------------------> morph_kernel
            |   w, l, a, op, DEST --> morph_scan_ctrl --window_full-->  |  |
            |                                                   result 8 b |
            |                          morph_master_writer <---------------+
 Avalon  <--+------------------------- (packing buffer + queue)            |
 master     +--------------------------------------------------------------+
```

| module | role |
|---|---|
| `morph_pkg` | sizes, register map, operation enum, master transfer struct |
| `morph_slave_ctrl` | slave decode; CTRL/STATUS; start pulse; interrupt; pixel stall |
| `morph_clock_gate` | latch-and-AND clock gate, used twice |
| `morph_param_memory` | mask rows and run parameters, with read-back |
| `morph_pixel_fifo` | serial-to-parallel: a pixels in, one line out |
| `morph_scan_ctrl` | row/column-pass counters, window-full and last-line flags |
| `morph_kernel` | window of the last a lines; masked min/max comparator trees |
| `morph_master_writer` | result addressing, 8-bit or packed 32-bit transfers, queue, done |
| `morph_ip` | top level: wires the above and the two gated clocks |

### Kernel

The kernel keeps the previous 22 lines of the current pass in a shift
register. With the incoming line they form a window of up to 23 lines.
Window slot `k` (0 = the incoming line) is matched with mask row `a-1-k`, so
the top mask row is applied to the oldest line. Erosion and dilation share
one datapath: for erosion every pixel is complemented, since
`min(x) = ~max(~x)`. A masked-out position contributes 0. Each of the 23
window rows is reduced by a balanced tree of 2-input maximum units, and the
23 row results by a second tree. The tree has no pipeline registers. The
only register is at the output, which gives a latency of one clock from a
line to its result. This costs about 550 8-bit comparators and a
23 x 23 x 8-bit window, which makes the kernel most of the IP's logic.

### Pixel FIFO and scan control

The FIFO collects the `a` pixels of a line in a write-indexed register.
After the `a`-th pixel it presents the line, in parallel, for one clock.
Each line is `a` pixels long and is sent whole, so no other framing is
needed. The scan control counts lines in the pass and passes in the image.
It tells the kernel when the window is full, which is from line `a-1` of
each pass on. It also marks the line that produces the last result of the
image.

### Result writer

* `PACK32 = 0`: one bus transfer per result, with the byte on all four lanes
  and a single byte enable.
* `PACK32 = 1` (default): a packing buffer collects the results that fall
  into the same 32-bit word. The word is sent when byte lane 3 is filled or
  the last result arrives, so a first or last word that is only partly
  filled goes out with partial byte enables. `DEST` need not be aligned.
  The number of bus transfers falls about fourfold: 8,100 instead of 32,400
  for the reference case.

Transfers wait in a 4-entry queue (`QDEPTH`) and follow Avalon-MM rules: a
write completes in a cycle where `avm_write` is high and `avm_waitrequest`
is low. While stalled, the address and data are held (an assertion checks
this).

## Clock domains and gating

| domain | clock | contents | enable |
|---|---|---|---|
| always on | `clk` | `morph_slave_ctrl` | none |
| memory | gated | `morph_param_memory` | `CTRL.MEM_CLK_EN` |
| processing | gated | FIFO, scan control, kernel, result writer | `CTRL.PROC_CLK_EN` |

Each gate latches its enable while `clk` is low and ANDs it with `clk`, so
gated edges line up with `clk` edges and never glitch. All three regions
therefore behave as one synchronous clock, and no signal needs
synchronising. Both enables are reset to **off**. Software turns them on as
it needs them. A typical sequence is: memory clock on; write the
parameters; memory clock off and processing clock on, with START; stream the
pixels; both clocks off after the interrupt. Effects of the gating that
software must respect:

* Parameter writes while the memory clock is off are lost. Reads still work.
* Pixel writes while the processing clock is off complete at once and are
  discarded, so the bus never hangs on a stopped IP.
* The parameters are held in registers, so the memory clock can stay off for
  the whole run.

All registers use an asynchronous active-low reset (`reset_n`), so a domain
whose clock is stopped is still reset.

## Programming model

Slave word addresses (`avs_address`, 6 bits, 32-bit data). Reads have no
wait states.

| word | name | access | contents |
|---|---|---|---|
| 0 | CTRL | RW | [0] START (write 1: new run; reads 0), [1] MEM_CLK_EN, [2] PROC_CLK_EN, [3] IRQ_EN |
| 1 | STATUS | RW1C | [0] BUSY (read only), [1] DONE (write 1 to clear; also clears `irq`) |
| 2 | OP | RW | [0] 0 = erosion, 1 = dilation |
| 3 | WIDTH | RW | image width w |
| 4 | HEIGHT | RW | image height l |
| 5 | MASK_SIZE | RW | a, clamped to 1..23 (normally odd) |
| 6 | DEST | RW | byte address of result 0 |
| 7 | PIXEL | W | [7:0] next pixel of the stream |
| 32+i | MASK_ROW i | RW | bit j = mask column j, for i, j < 23 |

START clears the FIFO, the counters and the result writer, and sets BUSY. A
pixel written in the next clock is already part of the new run. DONE is set
once the transfer that holds the last result has been accepted by the bus.
`irq` is `DONE & IRQ_EN`, a level that stays high until DONE is cleared.

**Flow control.** The IP accepts one pixel per clock. It stalls a PIXEL write
(`avs_waitrequest`) only when the result queue cannot take the results
already in flight, which happens only when the memory side applies
backpressure. With a memory that does not stall, a whole image streams at
exactly one pixel per clock: 836,280 clocks (8.4 ms at 100 MHz) for the
reference case. A result reaches the queue two clocks after the last pixel
of its line.

## How far the RTL follows its source, and where it departs

The source design specifies the overall architecture:

* the four parts: parameter memory, FIFO, kernel, and bus interface and
  control;
* the 23 x 8-bit line input and the 23 x 23-bit mask;
* the column-wise strip scan order and the masked min/max;
* the unpipelined comparator tree;
* the slave for configuration and pixels, and the master writing to a
  configured address with an interrupt at the end;
* the two gated clock domains, with the slave logic always on;
* the 8-bit master and the 32-bit master with an extra buffer.

These parts are this implementation's own choices, because the source does
not specify them:

* the register map, the START/DONE protocol and the level interrupt;
* the result addressing: column-major, consecutive bytes from DEST;
* border handling: only windows that lie fully inside the image give a
  result;
* the window held in the kernel as a shift register of lines, and the shared
  max tree with complemented inputs for erosion;
* the latch-and-AND clock gate (on an FPGA, the vendor's clock-control
  primitive is the natural replacement), the reset values (clocks off) and
  the asynchronous reset;
* the result queue depth (4) and the stall rule.

Out of scope: the processor, DMA, DDR2 controller and bus fabric around the
IP, and gating clocks at a PLL instead of in logic. Power-related choices
that are not hardware, such as coding binary images as 0/1 instead of 0/255
or power-driven place-and-route, need no RTL support: a 0/1 image simply
runs through the same datapath.

The IP's own speed is not the bottleneck of a complete system. Streaming
from DDR2 memory through a DMA is much slower than the one pixel per clock
that the IP accepts, so the time of a whole run depends on the system around
the IP.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `MASK_MAX_P` (`morph_ip`, kernel, FIFO, parameter memory) | 23 | largest mask size; sets the line width and the window |
| `PACK32` (`morph_ip`, `morph_master_writer`) | 1 | 1: packed 32-bit result transfers; 0: one 8-bit transfer per result |
| `QDEPTH` (`morph_ip`, `morph_master_writer`) | 4 | result queue depth; must be at least 3 |

The image dimension registers are 16 bits wide (`DIM_W` in `morph_pkg`), and
addresses are 32 bits wide. The register map has room for masks of up to 32
rows. A larger `MASK_MAX_P` also needs a wider `MASK_ROW` word and address
range.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_morph_clock_gate` | gated edge counts; no pulse cut short; no glitch when the enable rises while clk is high |
| `tb_morph_param_memory` | write/read-back of all words; clamp of the mask size; writes lost while the clock is stopped |
| `tb_morph_pixel_fifo` | line content and timing for a = 1, 3, 5, 23 with random gaps; clear; a pixel arriving together with clear |
| `tb_morph_kernel` | every result against a reference masked min/max; latency 1; empty and full masks; stray mask bits beyond a |
| `tb_morph_scan_ctrl` | counters, window-full, last-line (exactly once) and result count for several image and mask sizes |
| `tb_morph_master_writer` | 8-bit and packed instances; random memory wait states; unaligned bases; odd lengths; transfer counts; done |
| `tb_morph_slave_ctrl` | CTRL/STATUS; start pulse; interrupt and its clear; pixel stall and discard; parameter decode |
| `tb_morph_ip` | end to end with both master widths: 11 runs with random greyscale and binary (0/255 and 0/1) images and random masks, a = 1 to 23, both operations, random memory wait states; checks every result and that no byte outside the result area is touched; checks 1 pixel/clock, clock gating, interrupt and read-back; requires each mechanism (slave stall, master stall, erosion, dilation, partial word, gated-write loss, interrupt) to occur |
| `tb_morph_ip_full` | the default IP on the reference case: 202 x 202 image, full 23 x 23 mask, erosion then dilation; all 32,400 results of each checked; 836,280 clocks per stream; 8,100 transfers |

To run one with Verilator 5 (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl rtl/morph_pkg.sv tb/tb_morph_ip.sv \
          --top-module tb_morph_ip -Mdir obj_tb_morph_ip
./obj_tb_morph_ip/Vtb_morph_ip
```

The full-size testbench runs for well under a minute after compilation. The others take
under a second. Testbenches drive the bus at the falling clock edge and
sample `waitrequest` before the next rising edge. Every testbench makes a
real falling edge on `reset_n`, because the registers use an asynchronous
reset.

Lint notes: Verilator reports the latch in `morph_clock_gate`, which is
intended (see that file). It also reports `reset_n` as being used both as
an asynchronous reset and in the `disable iff` clauses of the bus
assertions, which is harmless.
