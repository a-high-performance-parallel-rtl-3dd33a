# UWGSP4: a shared-memory vector multiprocessor with a Z-buffered raster back end

UWGSP4 is a workstation for image processing and 3-D graphics. It has two halves:

- **Imaging.** Sixteen vector processing units compute in floating point and share one 1-Gbyte memory. Each unit has two pipelined FPUs, so the sixteen together peak at 1,280 MFLOPS.
- **Graphics.** Four scan-conversion chips (BBIs) fill Gouraud-shaded, Z-buffered spans at 40 Mpixel/s into a double-buffered 1280 x 1024 frame buffer.

The design rests on three ideas:

1. **Memory bandwidth to match the arithmetic.** Memory is interleaved 32 ways behind an 8 x 8 crossbar. Every vector, column or 2-D block access becomes a stream of row accesses at one word per 40 MHz cycle per memory controller. That is 8 x 160 = 1,280 Mbytes/s.
2. **No CPU time spent on pixel format conversion.** Each vector unit has a *pixel formatter* (PFU). It turns 8/16-bit unsigned pixels into IEEE floats on the way in and back again on the way out.
3. **Keep both FPUs of a unit busy.** The two FPUs alternate: even elements go to one, odd elements to the other. A 20 MHz FPU pair therefore accepts one element per 40 MHz cycle.

This repository holds synthesizable SystemVerilog for:

- the shared memory system;
- the token ring;
- the vector-unit datapath;
- the raster back end;
- a top level that wires them together.

Self-checking Verilator testbenches come with it. These parts are bought-in chips or software, and stay outside as ports or testbench models:

- the FPUs (TI 74ACT8847);
- the instruction issue of the vector units' control ASIC;
- the i80860 polygon pipelines;
- the TMS34020 system controller;
- the host interface, overlay, cursor and RAMDACs.

## Block map

```
           4 high-speed buses (80 MHz, 40-bit words)
 vector units ==HSB0..3==> mem_biu x4 ──> port_controller x8 ──> crossbar 8x8 ──> memory_controller x8 ──> mem_module x32
 (vpu_datapath x16)                                                                   (4 modules each, refresh)
 ipsync_ring (token over 16 units)

 spans ──> command_distributor ──> bbi x4 ──> fb_slice x4 (2 colour buffers + Z) ──> video_refresh ──> rgb
```

`uwgsp4_top` holds `shared_memory`, `ipsync_ring`, sixteen `vpu_datapath` and `raster_backend`. There is no processor-side bus interface. A vector unit's bus traffic and its FIFOs are therefore separate ports, and whatever drives the top moves words between them. In the testbenches, the testbench does this.

## Clocks and reset

- `clk` is the 40 MHz clock of every block except the bus side of the BIUs.
- `clk_bus` is 80 MHz and phase aligned: every rising edge of `clk` coincides with a rising edge of `clk_bus`.
- Each BIU toggles a phase bit on every `clk_bus` edge, so the two must start in step. Release `rst` in the second half of a `clk` cycle, after the mid-cycle `clk_bus` edge. The testbenches do this with `@(posedge clk); #15 rst = 0;` at a 25 ns period.
- Reset is synchronous and active high everywhere.
- Memory arrays (modules, register files, frame buffers) are not reset.

The FPUs of the original run on a 20 MHz two-phase clock. Here that is represented by the sequencer: it issues to each FPU on every second `clk` cycle.

The raster back end also runs on `clk`. Each BBI needs two cycles per pixel (read Z, then write), and there are four BBIs. So the quoted 40 Mpixel/s corresponds to a 20 MHz BBI clock.

## Shared memory (the hardest part)

### Address map

Word addresses are 28 bits (256 Mwords of 32 bits).

| bits | meaning |
|------|---------|
| [1:0] | module inside a memory controller (4-way interleave) |
| [8:2] | word inside the controller's 512-word segment, per module |
| [11:9] | memory controller (one of 8) |
| [27:12] | segment number inside the controller |

A row vector therefore runs through one controller at full rate for up to 512 words. A longer row moves on to the next controller. Different image rows or tiles naturally land on different controllers, so eight ports can stream in parallel. The module-local address is `{a[27:12], a[8:2]}`, which is 23 bits at full size.

This split is a design choice. The original states only the 32-way interleave and the 1-Gbyte size.

### Bus words and commands

All bus and crossbar words are 40 bits: 32 data bits and 8 control bits. `uwgsp4_pkg` defines them.

A processor command on the bus is:

- a header word `hdr_t`: mode, write flag, byte mask, `count_y`, `count_x`;
- an address word;
- a stride word (row pitch in words);
- for a write, the data words.

The modes are:

- **SCALAR:** one word.
- **ROW:** `count_x` consecutive words.
- **COLUMN:** `count_y` words, one stride apart.
- **ARRAY:** `count_y` rows of `count_x` words.

Downstream words carry:

- `rvalid` with a read word;
- a `done` pulse when a command completes;
- a `ready` bit that the upstream side must honour. `ready` drops when fewer than 6 words of the port controller's 16-word FIFO are free. The slack of 6 covers the bus delay.

### BIU (`mem_biu`)

The bus runs at twice the port-controller clock, and the BIU gives alternate bus cycles to its two port controllers.

- `bus_slot` tells the driver which port controller the next captured upstream word belongs to. The same signal tells which controller the present downstream word came from.
- Each port controller sees a stable 40 MHz word, held in a per-controller register.

### Port controller (`port_controller`)

The port controller turns one command into a series of *row* commands for the memory controllers, and sends them one after another:

- A row is cut wherever it crosses into the next 512-word segment, which is a different controller.
- A column becomes one single-word piece per element.
- An array becomes one or more pieces per row.

For each piece it:

1. requests the crossbar column of the target controller;
2. sends `XK_ADDR` (address, write flag, byte mask) and `XK_LEN`;
3. streams the data: write words go out as the controller accepts them, and read words are passed downstream;
4. releases the crossbar when the controller signals `done`.

The `pieces` counter shows how many row commands were issued.

### Crossbar (`crossbar`)

The crossbar switches 40-bit paths combinationally between 8 port controllers and 8 memory controllers.

- Each memory-controller column has a round-robin arbiter. A granted port keeps the column until it drops its request.
- `conflicts` counts cycles in which some request waited for a busy column.

### Memory controller (`memory_controller`)

The controller runs one row command at one word per cycle, which is 160 Mbytes/s. Because consecutive words go to consecutive modules, each module is used every fourth cycle.

- **Reads** return two cycles after issue, with `done` on the last word.
- **Writes** use the byte mask per word.
- **Refresh** takes a 4-cycle burst every 624 cycles (15.6 us at 40 MHz). It waits until the current word finishes, then stalls the command; `refresh_count` counts the bursts.

The refresh numbers are a design choice: the original says only that the controllers do refresh.

## Vector unit datapath (`vpu_datapath`)

A vector unit's datapath contains:

- `scalar_regfile`: 64 x 32 bits, two read and two write ports.
- Three `vector_regfile`s, A, B and C: 2048 words each, one read and one write port.
- `vector_sequencer`: computes C = A op B.
- `pixel_formatter` (the PFU), with an input FIFO from memory and an output FIFO to memory.
- A direct-mapped `icache`.
- A two-way set-associative, write-through `dcache`.

Every control input that the control ASIC would drive is a field of `vpu_in_t`.

**Vector operation.** The sequencer uses three `vector_agu` address generators: base, element stride and row stride, with element and row counts. Each cycle it reads A and B, and one cycle later it issues the pair to FPU 0 (even elements) or FPU 1 (odd elements). Results arrive in order, because both FPUs have the same latency, and are written to C. A vector of N elements completes in N + FPU latency + 2 cycles. The operation code passes through to the FPUs unchanged.

**PFU commands:**

- **UNPACK8/16/32:** memory words from the input FIFO are split into pixels, lowest bits first. Each pixel is converted exactly to a float and written to A or B.
- **PACK8/16/32:** floats are read from C and rounded to nearest (ties up). They are clamped to the pixel range, with negative values and NaN giving 0, then packed into words. A final partial word is zero-padded.
- **MOVE:** copies C to A or B, so a result can be the next operand.

All commands run at one element per cycle.

**Caches.** Both caches are 4096 words with 4-word lines and refill through a `fill_req` / `fill_valid` stream. The original gives the caches as "4 kbytes" in its text but as "4k x 32" in its block diagram; the diagram's size is used. Its data cache is described as a "modified" set-associative cache without saying what the modification is, so a plain two-way cache with LRU stands in for it.

## Token ring (`ipsync_ring`)

One token circulates over the sixteen vector units, moving one position per cycle.

- A unit that requests it keeps it for as long as its request stays high.
- `grant = token & req`.
- The testbench uses the ring as a barrier: every unit raises its request and drops it once granted.

## Raster back end (`raster_backend`)

A span is one horizontal run of pixels of a polygon on one line. It carries:

- the start x and length, and the line y;
- start depth (24.8 fixed point) and its per-pixel delta;
- start R, G and B (8.8 fixed point) and their deltas;
- an alpha byte;
- a Z-test flag.

The polygon pipelines, not built here, would produce spans. Drawing proceeds like this:

1. **Distribution.** `command_distributor` gives every span to all four BBIs. It takes the next span only when all four have accepted the last one; `dist_waits` counts the cycles it waits.
2. **Pixel ownership.** BBI *k* owns the pixels with x mod 4 = k and its own `fb_slice`, which is 320 x 1024 words per buffer.
3. **Stepping.** Each BBI steps the depth and colours by four times the deltas, starting at its first own pixel.
4. **Z test.** For every own pixel the BBI reads Z, then writes Z and colour if the pixel is nearer (smaller Z) or the span has the Z test off. That takes 2 cycles per pixel per BBI, so 2 pixels per cycle in total.
5. **Pixel format.** The stored pixel is `{alpha, R, G, B}` with 8 bits each, and Z keeps the integer 24 bits.

**Display.** Each slice holds two colour buffers and one Z buffer.

- Drawing always goes to the back buffer; `video_refresh` reads the front one.
- Video refresh scans 1280 x 1024 active pixels, with 408 and 42 blanking cycles and lines, reading slice `x mod 4`.
- A swap request takes effect at the end of the last active line; `swap_done` pulses and `front` flips.

There is no Z clear command: a span with the Z test off writes its depth unconditionally, which is how the testbenches clear the screen.

## How far it follows the original

**Followed.** These numbers are the original's own:

- the counts: 16 units, 4 buses, 4 BIUs, 8 port controllers, 8x8 crossbar, 8 controllers, 32 modules;
- the sizes: 1 Gbyte, 64 scalar registers, 3 x 2048-word vector files, 1280 x 1024 x 32 double buffer, 24-bit Z;
- the 40-bit word;
- the rates: 80/40 MHz, 160 Mbytes/s per controller, 40 Mpixel/s;
- the alternating FPUs;
- the PFU functions;
- direct-mapped and set-associative caches;
- the token ring.

**Chosen here.** The original does not give these:

- the address bit split;
- all word and command formats;
- flow control and refresh timing;
- crossbar arbitration;
- the token-ring rules;
- the PFU rounding and clamping;
- cache lines and write policy;
- the BBI pixel split, span format and fixed-point widths;
- the distributor protocol;
- blanking and swap timing.

**Not built:**

- the control ASIC's instruction fetch and issue (no instruction set is given);
- the FPUs;
- the vector units' bus interface;
- the polygon pipelines;
- the system controller;
- host interface, overlay buffer, cursor and RAMDACs;
- the BBIs' transparency, antialiasing, texture mapping, block transfer and multi-window ("extended Z") features, which are named but not described;
- line drawing.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. Each has a watchdog. Build and run any of them with plain Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/uwgsp4_pkg.sv $(ls rtl/*.sv | grep -v uwgsp4_pkg) \
  tb/fp32_pkg.sv tb/fpu_model.sv tb/tb_uwgsp4_top.sv \
  --top-module tb_uwgsp4_top -Mdir obj && obj/Vtb_uwgsp4_top +verilator+rand+reset+2
```

The package must come first. Random initial values (`+verilator+rand+reset+2`) are a good check that everything read is reset.

| testbench | what it shows |
|-----------|---------------|
| `tb_uwgsp4_top` | End to end at reduced size: 4 vector units, 4096-word modules, a 16 x 8 screen, refresh every 50 cycles. Pixels go through shared memory into a vector unit, are unpacked, subtracted on alternating FPUs, packed, written back and checked. A token-ring barrier runs, then eight ports hit one controller. Spans are drawn, swapped and the shown frame is checked. It counts and requires each mechanism: segment split, refresh, crossbar conflict, FIFO-full stall, FPU alternation, PFU commands, token grants, Z-hidden pixels, distributor waits, buffer swap. |
| `tb_uwgsp4_full` | The same run on the top with every parameter at its default: 16 units, 1 Gbyte, 1280 x 1024. About a minute of simulation and about 1.1 GB of host memory. |
| `tb_shared_memory` | All access modes, byte masks, segment splits, refresh and conflicts. Eight parallel 512-word reads must finish in 512 cycles plus refresh. |
| `tb_vpu_datapath` | PFU → vector op → PFU on one unit, plus scalar registers and both caches. |
| `tb_raster_backend` | Clear, random Z-tested spans, swap, whole displayed frame. The fill rate must reach 2 pixels per cycle. Ten 100-pixel Gouraud squares take 748 cycles: 267,000 polygons/s at 20 MHz, against the 200,000 required. |
| `tb_workload_conv5x5` | A 5x5 convolution of a 12x12 tile on one vector unit. The weights are repeated through stride-0 addressing, and the window is walked with the 2-D generators. Each output pixel is checked exactly against single-precision arithmetic. The run prints the cycle cost: 104.6 cycles per output pixel per unit. That is 42.8 ms for a 512x512 image on 16 units at 40 MHz, against a target under 30 ms. The gap comes from how partial sums are built: each one takes a separate add and a PFU move, because no chained multiply-accumulate is used. |
| one per block | `tb_<module>`, comparing against a reference model in the testbench. |

`tb/fpu_model.sv` is a behavioural FPU: 4-cycle latency; add, multiply and subtract in floating point, plus integer add and multiply. It computes through `real` with the helpers in `tb/fp32_pkg.sv`.

## Changing it

- **System size.** `uwgsp4_top` takes `N_VPU`, `N_BUS`, `MOD_BITS`, the screen timing and `REFRESH_PERIOD`.
- **Sub-block knobs.** `SEG_BITS` and `REFRESH_CYCLES` are parameters of `shared_memory` and `memory_controller`.
- **Bus and crossbar word layout.** This lives in `uwgsp4_pkg`. The crossbar and bus assume 40-bit words, so keep the structs at 40 bits.
- **FPU latency.** The sequencer relies on both FPUs having the same fixed latency. FPUs with unequal latencies would need a reorder buffer in front of register file C.
