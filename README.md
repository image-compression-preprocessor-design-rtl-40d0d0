# Layered image compression preprocessor

This preprocessor sits between an image source and two compression coders.
It takes frames of 64 pixels (16 bits each, one pixel per clock, 20 ns per
pixel at 50 MHz) and splits each frame into five layers: two base layers
(B1, B2) and three enhanced layers (E1, E2, E3). It stores each frame in a
two-frame ("ping-pong") memory. It then sends the frame out on two
independent routes at the same time, so that two coders can work in
parallel:

* the **E route** carries the enhanced layers E2, E1, E3 (48 pixels);
* the **B route** carries the base layers B1 and B2 (32 pixels). B2 has only
  4 stored pixels and is rebuilt to 16.

The work is split into a few large tasks that each run on their own:
down sample, buffer control, frame memory and spatial redundancy. They pass
work along through handshakes. While one frame is read out, the next one is
written.

```
            stat/pix_data_in                         data_out_e (E's) -> coder 2
 source ---> down_sample ---> buffer_control ---> pingpong_ram ---> spatial_redundancy
   ^  pix_ready   sorted pixel    | write A (pixel)   read A (E)       |  + pixel_rebuild
   |              + layer code CL | write B (B2 copy) read B (B)       |
   +------------ stall -----------+<---- frame_full / release ---------+ data_out (B's) -> coder 1
```

## How a frame is split into layers

Pixels arrive in a fixed repeating pattern of four: B1, E2, E3, E1. Pixel
*i* of a frame (i = 0..63) goes to this layer, at position *i*/4:

| i mod 4 | layer | layer code CL |
|---------|-------|---------------|
| 0       | B1    | 000           |
| 1       | E2    | 001           |
| 2       | E3    | 100           |
| 3       | E1    | 010           |

The four layers each get 16 pixels. The fifth layer, B2, is taken from E1.
Every fourth E1 pixel (E1 positions 0, 4, 8 and 12, which are input pixels
3, 19, 35 and 51) is also B2 pixel 0, 1, 2 and 3. `down_sample` tags each
pixel with its layer code and position. It flags the E1 pixels that are also
B2 pixels, and the last pixel of the frame.

The layer code has a second job: it is also the number of the layer's
section in the frame memory.

## Frame memory map

A frame bank holds 5 sections of 16 words, 80 words in all. The word address
is `CL * 16 + position`:

| words  | CL  | layer | filled with                                |
|--------|-----|-------|--------------------------------------------|
| 0-15   | 000 | B1    | input pixels 0, 4, ..., 60                 |
| 16-31  | 001 | E2    | input pixels 1, 5, ..., 61                 |
| 32-47  | 010 | E1    | input pixels 3, 7, ..., 63                 |
| 48-51  | 011 | B2    | input pixels 3, 19, 35, 51 (52-63 unused)  |
| 64-79  | 100 | E3    | input pixels 2, 6, ..., 62                 |

`pingpong_ram` has two such banks. It has two write ports and two read
ports, and all four work in the same cycle. Write port A stores every
pixel. Write port B stores the B2 copy of an E1 pixel in the same cycle.
Read ports A and B serve the E route and the B route at the same time.
Reads are synchronous: data appears one cycle after the address and is held
while no read is issued.

## The bank handshake between buffer control and spatial redundancy

This is the heart of the control. Two rules matter:

* SR (spatial redundancy) must not start on a frame before all of it is
  stored.
* Buffer control must not overwrite a bank before SR has finished reading
  it.

`buffer_control` fills banks 0, 1, 0, 1, and so on. When it writes the last
pixel of a frame, it sets that bank's `frame_full` bit and moves to the
other bank. `spatial_redundancy` keeps its own bank pointer and follows the
same order. When `frame_full` is set for its bank, SR starts both read
routes together. When both routes have handed over their last pixel, SR
sends a one-cycle `rel_valid` with `rel_bank`, and moves to the other bank.
Buffer control clears the `frame_full` bit on the next edge.

SR also waits on the coders. The coders send rebuilt data back to SR, and SR
may not start a new frame until that has happened. In this design this is a
`coder_done` pulse. After SR has started a frame, it starts no further frame
until `coder_done` arrives. While a full frame waits for it, `coder_wait` is
high. Coders without such feedback tie `coder_done` high.

Buffer control accepts no pixel for a bank whose `frame_full` bit is still
set. That pushes back through `down_sample` to the source as `pix_ready`
low. So the input stalls only when both banks hold frames that the coders
have not yet taken. An assertion in `buffer_control` checks that SR never
releases a bank that is not full.

## Output routes and the B2 rebuild

Each route is run by a `route_reader`. It issues one read per cycle and
presents the word on the next cycle with a valid flag. It issues the next
read only if the output register is empty or being taken. A coder that
holds its ready input low therefore stalls its own route without losing
pixels. The other route keeps running.

* E route, index k = 0..47: word `16 + k` for E2, `32 + (k-16)` for E1,
  `64 + (k-32)` for E3.
* B route, index k = 0..31: `pixel_rebuild` maps k < 16 to B1 word k. It
  maps k >= 16 to B2 word `48 + (k-16)/4`. Each stored B2 pixel is sent four
  times (nearest-neighbour rebuild). The three repeats are flagged on
  `data_out_rebuilt`.

Each output pixel carries its layer code and a last-of-frame flag. Pixels
pass through unchanged: no prediction or redundancy removal is applied to
them.

## Timing

* Input: one pixel per clock while `stat` and `pix_ready` are high.
* The first output pixel of a frame is valid 66 cycles (FRAME_PIX + 2)
  after the clock edge that accepted the frame's first pixel, if the input
  runs at full rate. That is 1.32 us at 20 ns per pixel. The whole frame is
  stored before it is read.
* The E route then delivers 48 pixels in 48 cycles, and the B route 32
  pixels in 32 cycles. Both are shorter than the 64 cycles a frame takes to
  arrive, so the design keeps up with the input as long as the coders do.

## Top-level ports (`preprocessor_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `stat` | in | 1 | input pixel valid |
| `pix_data_in` | in | 16 | input pixel |
| `pix_ready` | out | 1 | pixel accepted (low = stall) |
| `data_out`, `data_out_valid`, `data_out_ready` | out/out/in | 16/1/1 | B route stream to coder 1 |
| `data_out_layer`, `data_out_last`, `data_out_rebuilt` | out | 3/1/1 | layer code, last pixel of frame, rebuilt pixel |
| `data_out_e`, `data_out_e_valid`, `data_out_e_ready` | out/out/in | 16/1/1 | E route stream to coder 2 |
| `data_out_e_layer`, `data_out_e_last` | out | 3/1 | layer code, last pixel of frame |
| `coder_done` | in | 1 | coder feedback pulse; SR may start the next frame (tie high if unused) |
| `coder_wait` | out | 1 | a full frame is waiting for `coder_done` |

The parameters are `PIX_W` (default 16) and `FRAME_PIX` (default 64). A
layer is FRAME_PIX/4 pixels and B2 is FRAME_PIX/16 pixels. `FRAME_PIX`
must be a power of two, at least 16; only the default has been simulated.
The shared constants and the
layer-code enum `cl_e` live in `pp_pkg`.

## Files

| file | contents |
|------|----------|
| `rtl/pp_pkg.sv` | default sizes, layer codes, pattern-to-layer function |
| `rtl/down_sample.sv` | layer sort and B2 extraction |
| `rtl/buffer_control.sv` | address generation, bank alternation, BC-SR handshake, input stall |
| `rtl/pingpong_ram.sv` | two-bank memory, 2 write and 2 read ports |
| `rtl/route_reader.sv` | read sequencer with back-pressure, one per output route |
| `rtl/pixel_rebuild.sv` | B route address map, B2 rebuild |
| `rtl/spatial_redundancy.sv` | starts and ends frames, E/B bifurcation |
| `rtl/preprocessor_top.sv` | the whole preprocessor |
| `tb/tb_<module>.sv` | self-checking testbench for each module above (except `route_reader`, which is tested inside `tb_spatial_redundancy`) |

## Simulating

Every testbench checks itself. Each one prints
`TB_RESULT checks=N failures=M` and stops. For example, the end-to-end test
at the default size:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/pp_pkg.sv tb/tb_preprocessor_top.sv --top-module tb_preprocessor_top
./obj_dir/Vtb_preprocessor_top
```

`tb_preprocessor_top` sends eight random frames. It checks every output
pixel against a reference model written in the testbench from the layer
rules above, and it checks the 66-cycle first-output latency and the
one-pixel-per-cycle output rate. It makes slow coders fill both banks, so
the input is stalled, and it counts that this happened. It also counts
coder stalls on each route, the delivered B2 and rebuilt pixels, and the
cycles SR spends waiting for `coder_done`. It checks that no frame starts
before the previous frame's `coder_done`. The
block testbenches check:

* the layer rules (`tb_down_sample`);
* addresses, bank alternation, stall and release (`tb_buffer_control`);
* four-port memory traffic against a reference array (`tb_pingpong_ram`);
* the rebuild map (`tb_pixel_rebuild`);
* both routes with random stalls, plus release order (`tb_spatial_redundancy`).

## Design choices and limits

The following follow the source description of this preprocessor:

* the five layers and the repeating B1 E2 E3 E1 input pattern;
* 16 pixels per layer;
* the layer codes and the section order of the frame;
* two frame banks with concurrent read and write;
* the handshake between buffer control and SR;
* two independent output routes for E's and B's;
* 16-bit pixels, 64-pixel frames and 20 ns per pixel.

The following are this design's own choices:

* **Which E1 pixels form B2.** Every fourth E1 pixel is used. The
  description only says that B2 is taken from E1, 4 pixels from 16.
* **How B2 is rebuilt.** Each B2 pixel is repeated four times. The
  description only says that B2 is rebuilt to a full layer with generated
  pixels. Interpolation could replace `pixel_rebuild` without touching
  anything else.
* **Handshake signals.** All the signals of the handshakes are this
  design's own: ready/valid streams, a full flag per bank, a release pulse,
  and the single `coder_done` pulse for the coder feedback.
* **Layer order within a route.** The E route sends E2, E1, E3, and the B
  route sends B1 then B2.
* **Synchronous-read memory with separate ports.** This replaces a shared
  bidirectional bus. In the reference system, the external DCT processors
  drive the memory addresses. Here SR generates them, and the coders only
  give a ready signal.
* **Reset.** An asynchronous active-low reset clears all control state. The
  memory contents are not reset.

Known departures and things that are not included:

* **Spatial redundancy does not transform pixels.** It only bifurcates the
  frame into E's and B's. No prediction or redundancy-removal algorithm is
  specified for it, so none is implemented.
* **Motion estimation is not included.** It appears in the data flow
  between the frame memory and the pixel rebuild, but no algorithm is
  specified for it.
* **The coders are not included.** These are the two DCT coders. Their
  streams and ready inputs are the `data_out*` ports. Their feedback of
  rebuilt data to SR is reduced to the `coder_done` pulse; the rebuilt data
  itself does not re-enter the design.
* **The system around the chip is not included.** That is the image source
  and A/D converters, the host DSP with SD RAM, the PCI link and the PC.
* **Output latency differs from the reference simulation.** That
  simulation shows output from about 520 ns (26 pixel times). This design
  gives its first output at 1.32 us, because it stores a complete frame
  before reading it. The reference waveform's output values equal later
  input pixels in input order. No rule is given that would produce them,
  and this design does not try to reproduce them.
* **The memory is a plain array.** At 2 x 80 x 16 bits it infers a memory
  directly. Much larger frames would call for a vendor RAM macro or an
  external memory.
