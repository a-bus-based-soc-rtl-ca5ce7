# ReCoBus SoC: a bus for hardware modules placed anywhere on a reconfigurable FPGA

On a partially reconfigurable FPGA, hardware modules are loaded into a dynamic area at run time.
A module should run wherever there is room for it. It should be able to act as a bus slave for
the CPU, as a bus master with direct memory access, and as a stage in a video pipeline, all
without any change to the static part of the chip. This RTL models such a system. It has:

- a *reconfigurable bus* (ReCoBus): a regular, slot-based bus structure laid across the dynamic
  area;
- a *PLB/RCB bridge* that connects the ReCoBus to the CPU's system bus (PLB) and to the memory
  controller's native port (NPI);
- *I/O bars*: streaming lines through the same slots, used for video.

On top of it sits a smart-camera case study:

- skin-colour detection on the video stream;
- a frame buffer that stores every frame in external memory;
- a particle-filter evaluation accelerator that weighs candidate hand positions by counting skin
  pixels;
- one position marker per tracked region.

The CPU, the PLB fabric, the DDR controller, the video board and the configuration port (ICAP)
are outside the RTL. Their signals are ports of `soc_top`.

## The slot structure and why data must be realigned

The dynamic area has four ReCoBus macros. There are two macros per reconfigurable region, and
each macro serves one row of modules (one row is 16 CLBs high). Each macro is 24 slots wide, and
one slot is one CLB column. A slot carries 8 bits in each direction.

The bus is **interleaved six ways**. The macro has six byte-wide read chains and six byte-wide
write chains, and slot `s` is attached to chain `s mod 6`. A module that is `w` slots wide
therefore owns `min(w,6)` distinct chains, that is up to 48 bits:

- A 1-slot module is an 8-bit peripheral.
- A module of six slots or more gets the full 48 bits, which is 32 data bits plus 16 control
  bits for master bursts.

Each read chain is an AND/OR chain. In every slot the module's output byte is ANDed with its
select and ORed into the chain, and an empty slot passes the chain on unchanged. A slot only
drives when its select is high, so the chain carries exactly one module's bytes
(`recobus_macro.sv`).

Interleaving lets a module be placed at any slot, but it makes the byte order depend on the
placement. A module always puts its first byte on its *first* slot. If that slot is slot 8, the
first byte arrives on chain 2. The bridge undoes this rotation in **adapt alignment**
(`adapt_alignment.sv`):

- There is one 3-bit alignment register per (macro, select code). It holds the chain of the
  module's first slot, which is `first_slot mod 6`.
- On reads, output byte `k` of the 48-bit word is `rchain[(first + k) mod 6]`.
- On writes, the inverse rotation is applied: chain `c` carries byte `(c - first) mod 6`.

So, seen from the CPU or from memory, byte 0 is always the module's first slot, wherever the
module sits. A module narrower than six slots only sees its own chains. The CPU must keep the
data it uses in the low bytes: for an 8-bit module, that is byte 0.

### Select generation

Each slot has a **reconfigurable select generator** (RSG, `rsg.sv`). The RSG is a 16-entry
look-up table indexed by the 4-bit select code of the macro address. The slot is selected when
its entry is 1 and the bus is not idle. Loading the same table into all slots of a module gives
the module its address. Two instances of the same module get different codes, so they can be
addressed separately.

On the FPGA, these tables are changed by bitstream manipulation. Here they are loaded through a
bridge register. The macro-internal address is `{code[3:0], offset[7:0]}`, and it is broadcast
to all slots rather than interleaved.

### Request wires

Each macro has a bundle of 4 request wires. Any slot can be connected to any wire, and this
connection is set through the bridge (on the FPGA it is switch-matrix routing). Across the four
macros this gives 16 request lines. They go to the **request switch** (`request_switch.sv`),
which has two masks:

- **irq mask**: lines that are interrupts. An interrupt line sets a pending bit, which is
  cleared by writing 1, and the OR of the pending bits drives `irq`.
- **bus request mask**: lines that are master bus requests. These go to the arbiter.

### Module reset

Software can reset one module without touching the others:

1. Write bridge word 100 with the macro, the module's select code and `assert=1`.
2. Every slot whose RSG answers to that code raises a registered `slot_rst`. The RSG decodes
   this with a second read port of the same table.
3. Write the word again with `assert=0` to release the reset.

In `soc_top`, each module's reset is the system reset combined with the `slot_rst` of its first
slot. Reset a master only while it is idle. The bridge finishes a burst it has already started
by counting beats, so a master reset in mid-burst leaves that burst's data undefined.

## Bus operations

`rcb_op_e` has four values:

- **IDLE**
- **WRITE** (CPU to module register)
- **READ** (module register to CPU)
- **GRANT** (master cycle)

Only the macro chosen by the address sees a non-idle operation (`connect_logic.sv`). Its read
chains are the ones returned.

### CPU access to a module

A PLB access at a module address becomes exactly one ReCoBus cycle on the chosen macro and
select code. It is acknowledged one cycle later, and read data comes back with the acknowledge.
The PLB itself is reduced to a `req` that is held until a one-cycle `ack`.

### Master bursts

A master raises its request wire. The arbiter (`rcb_arbiter.sv`) grants masters round robin
among the masked bus requests. The bridge then finds the master's select code in a
CPU-written table (request line to code) and runs GRANT cycles on it. In a GRANT cycle, the
8-bit offset field carries the phase:

| phase | master drives / receives |
|---|---|
| `MST_HDR` | master drives the 48-bit header `{7'b0, write, len[7:0], addr[31:0]}`; it moves `len+1` words |
| `MST_WBEAT` | master drives one write word on bits 31:0 |
| `MST_RBEAT` | bridge drives one read word on bits 31:0 |
| `MST_WAIT` | nothing moves (memory not ready, or a CPU access in progress) |

The module side of this protocol is packaged in `rcb_master_port.sv`. The frame buffer and the
accelerator both use it.

CPU accesses have priority. A PLB request that arrives during a burst is served right away: the
burst sees `MST_WAIT` for those cycles (a *stall*) and then resumes. The stall count and the
burst count can be read back from the bridge.

### Where bursts go

The bridge switch (`bridge_switch.sv`) checks `addr[31:28]`:

- Region 0 goes to the **NPI module** (`npi_module.sv`), which is a direct path to the memory
  controller that bypasses the PLB.
- Every other address goes to the `plbm_*` burst port, where a PLB master would sit.

The NPI module cuts a burst into transfers of at most 32 words:

- For a write, it fills the controller's write FIFO first and then issues the address request.
- For a read, it issues the request and then drains the read FIFO.

A 256-word burst takes 274 cycles as a write and 330 cycles as a read, against 8-cycle memory
latency. That is close to one word per cycle, which is 400 MB/s at 100 MHz. `tb_npi_throughput`
measures the rate over the transfer length:

| length | 5 B | 10 B | 50 B | 100 B | 200 B | 500 B | 1000 B |
|---|---|---|---|---|---|---|---|
| write MB/s | 100 | 166 | 312 | 357 | 363 | 373 | 374 |
| read MB/s | 41 | 76 | 217 | 285 | 289 | 308 | 309 |

Short transfers are dominated by the memory latency, and reads pay it on every 32-word transfer.

## Bridge address map (PLB byte addresses)

| address | meaning |
|---|---|
| `addr[20]=0` | module access: `addr[17:16]` macro, `addr[15:12]` select code, `addr[9:2]` register offset |
| `addr[20]=1`, word 0..63 | alignment register of `{macro, code}`: the chain of the module's first slot |
| word 64 / 65 | irq mask / bus request mask (16 bits) |
| word 66 | irq pending; write 1 to clear |
| word 80..95 | select code of the master on request line 0..15 |
| word 96 | RSG load `{macro[29:28], slot[24:20], lut[15:0]}` |
| word 97 | request wiring `{macro[29:28], slot[24:20], enable[8], wire[1:0]}` |
| word 98 / 99 | stall counter / master burst counter (read only) |
| word 100 | module reset `{macro[29:28], code[15:12], assert[0]}`; reads back the asserted macros in bits 3:0 |

"Word `n`" means `addr[10:2] = n`.

## Placing a module

For each slot the module occupies, software does the following:

1. Load the module's select code into that slot's RSG.
2. Write `first_slot mod 6` into the alignment register of `{macro, code}`.
3. If it is a master or raises interrupts, wire its request slot(s) to a free request wire,
   set the matching mask bit, and for a master write its code into the master table.

`tb/tb_soc_top.sv` performs exactly this sequence. Its `place` and `wire_req` tasks are a
minimal driver.

## I/O bar

An I/O bar (`io_bar.sv`) is a 35-bit stream word that passes through the 24 slots of one macro
row. The word is `{valid, sof, eol, class[7:0], rgb[23:0]}`. In each slot, a module may read the
word and replace it. The replacement is combinational along the bar.

Four bars enter the static part, where `io_bar_connection.sv` has two kinds of multiplexer:

- one per bar start, choosing between the camera input `IO_in` and the end of any bar;
- one for `IO_out`.

The multiplexers are registered, so a bar fed from its own end does not form a loop. With
these multiplexers, video can be chained through modules in different rows.

The sources are set through `iob_cfg_*` on `soc_top`. The index is 0..3 for the bar starts and 4
for `IO_out`. The source value is 0 for `IO_in` and `1+b` for the end of bar `b`.

## The case-study modules

All modules are ReCoBus slaves with word registers at offsets 0, 1, 2, and so on. Table I of the
original system fixes their widths (skin 7, marker 4 and accelerator 7 slots), and these widths
are used.

### `skin_color_detect`

This module converts RGB to YCbCr with integer BT.601 coefficients and tests each pixel against
a box template:

- register 0: minimum `{Y,Cb,Cr}`;
- register 1: maximum;
- register 2: enable.

The reset template is Cb 77..127, Cr 133..173. With `YCBCR=0` the test is done directly on RGB,
and the reset template is then R≥95, G≥40, B≥20.

The result goes into class bit 0, and the RGB value passes through unchanged. Latency is one
cycle.

### `marker`

This module draws a filled square at a CPU-written position:

- register 0: position `{y,x}`;
- register 1: colour;
- register 2: `{half-size, enable}`.

It counts pixels from `sof`/`eol`. There is one marker per tracked region.

### `framebuffer`

This is a master that stores every pixel as the word `{class, R, G, B}` at
`base + 4*(y*720+x)`:

- register 0: base 0;
- register 1: base 1;
- register 2: enable;
- register 3: status `{overflows, frames, last buffer}`.

Frames alternate between the two bases (double buffering). Pixels go into a 64-word FIFO, which
is emptied in bursts of 16. If the FIFO is full, the pixel is dropped and counted as an overflow.
A frame is complete when its last burst is written.

### `particle_eval`

This is the filter's evaluation step:

- register 0: particle set address;
- register 1: number of particles (up to 1024);
- register 2: frame address;
- register 3: control (start bit 0, clear-done bit 1; reads back `{busy, done}`);
- register 4: cycles of the last run.

A particle is two words: `{y[15:0], x[15:0]}` and then a weight word. The module proceeds as
follows:

1. It loads all positions into a local buffer.
2. For each particle it reads the 9×9 pixel region (nine row bursts of up to nine words, clipped
   at the image border) and counts pixels with class bit 0 set.
3. It writes the counts back as the weights.
4. It raises its interrupt.

Its bus request is on its first slot and its interrupt on its second. Sampling and propagation of
the particles are meant for software.

## Where this design departs from the original system

- **PLB and NPI are simplified.** The PLB slave is a request/acknowledge pair. The PLB master is
  a valid/ready burst port. The NPI signal set follows the usual address-request/FIFO style of
  such ports.
- **Configuration registers replace bitstream edits.** RSG tables and request-wire routing are
  set on the FPGA by changing configuration bits, and here they are registers. Alignment
  registers, masks and the master table are registers in both.
- **Modules are instantiated in fixed slots.** `soc_top` places them as one bitstream would:
  skin at slots 0..6 and the frame buffer at 7..12 on macro 0, markers at 8..11, 12..15 and
  16..19 on macro 1, and the accelerator at 0..6 on macro 2. Macro 3 is free. The video runs
  `IO_in` → bar 0 (skin, frame buffer) → bar 1 (markers) → `IO_out`, so the stored frames carry
  the classification but no markers. The rows follow the original floorplan; the slot numbers
  are this design's. Moving a module means editing the placement in `soc_top`; the software
  side (RSG, alignment, wiring) already takes any position. The accelerator is two rows high in the original, but only one row carries its
  bus connection here.
- **Several details are this design's own.** The original description gives only the function of
  the following, so these choices are this design's:
  - the master header format and its phase coding;
  - the round-robin and stall details;
  - the address map;
  - the 4-wire request bundle;
  - the skin template and its thresholds;
  - the marker shape;
  - the frame buffer's FIFO and burst sizes;
  - the particle memory layout.
- **The game module of the demonstrator is not modelled.** It is described only by name.

## Verification

Every block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M`. Two shared models support them:

- `tb/npi_mem_model.sv`: the memory behind the NPI, with latency;
- `tb/tb_rcb_host.sv`: a bridge-side host that runs master bursts with random wait cycles.

`tb_soc_top` runs the whole SoC with every parameter at its default:

- It streams two full 720×576 frames at the PAL pixel rate (one pixel every 5 cycles at 100 MHz).
- It checks every output pixel (skin class and marker squares) and every stored word of both
  frames. The frame buffer sits on alignment 1, so master headers and data are realigned too.
- It runs 60 particles during the second frame. The particle set is read over the PLB master
  path, and the frame over the NPI. Each weight must equal the skin count computed in the
  testbench.
- It counts stalls, simultaneous master requests, non-zero alignment, both burst destinations
  and the interrupt, and fails if any of them never happens.

`tb_particle_workload` runs the accelerator alone on the same full-size SoC, with the frame
and the particle set in DDR behind the NPI. It evaluates 100, 200, 500 and 1000 particles, and
checks every weight and the run time. With 8 cycles of memory latency, a particle costs about
216 cycles, so 1000 particles take 2.16 ms at 100 MHz. The original hardware took 4.2 ms, and
the test fails if a run is slower than the original's time. Nine short row bursts per particle
make memory latency, not the counting, the limit.

At one pixel every 2 cycles, the frame buffer overflows while the accelerator holds the bus
during memory latency. At the PAL rate it does not.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/rcb_pkg.sv tb/tb_soc_top.sv --top-module tb_soc_top
./obj_dir/Vtb_soc_top
```

Replace `tb_soc_top` with any other `tb_*` module to run that block's test. Verilator simulates
with two states and random initial values, so every register read in the design has a reset.
