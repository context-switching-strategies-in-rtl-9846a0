# Context switching on a multi-context reconfigurable board

A multi-context reconfigurable device stores several complete
configurations, called *contexts*, at once. Only one is active. Switching
to another takes a single clock. An application that is too big for the
device, or that has to do different jobs at different times, can be split
into contexts and swapped on the fly instead of reloading a bitstream.

The open question is **who decides when to switch**. This RTL models a
board with two such devices (CSRC A and CSRC B, four contexts each) and a
support FPGA. It implements three ways of driving context switches, one
per application:

| strategy    | who issues the switch                              | application here                                          |
|-------------|----------------------------------------------------|-----------------------------------------------------------|
| host-driven | the user or host software, at any time              | video filters (`video_system`)                            |
| FSM-driven  | a state machine in the support FPGA that the host programs | motion detection (`motion_system`)                |
| data-driven | the device itself, from the data it is processing   | per-channel packet encryption (`enigma_system`)           |

The top, `rcm_top`, puts the three applications side by side. Each has its
own ports. The top also contains one context-switching logic cell
(`cslc`), the building block of the device fabric.

Everything is synchronous to one clock, `clk`. Reset is `rst_n`,
active-low and asynchronous. Streams use valid/ready handshakes. A word
moves on a clock edge where both valid and ready are high.

## The context as seen by the RTL

A real CSRC device is a fabric of configurable cells. Here, each
*configured* device is written as ordinary RTL: one module per context,
plus a small multiplexer on the active context. What the fabric gives,
and what this RTL keeps, is:

* **Global context lines** (`ctx_switch`). `ctx` becomes the active
  context on the clock edge where `ctx_sw` is high. Every context module
  gets an enable, `en = (active == its number)`. While disabled, a
  context freezes all its registers. When it is switched back in, it
  resumes where it stopped, because each context owns its own state
  registers.
* **Shared on-chip memory** (`csram`). This memory is not part of any one
  context. It is how one context hands results to the next. It has one
  synchronous write port and one synchronous read port. Read data appears
  one clock after `re`, and is held while `re` is low. The active context
  owns both ports.
* **Per-context cell state** (`cslc`). At cell level, each cell has one
  flip-flop value per context (*private*) and one *public* register. A
  context can leave its value in the public register when it is switched
  out, and the next context can start from it. See "The logic cell".

The package `csrc_pkg` holds the shared constants and types:

* the number of contexts (4) and `ctx_t`;
* the context numbers of the motion stages;
* the switch-source enum `ctx_src_e` (`SRC_HOST`, `SRC_FSM`, `SRC_DATA`);
* the frame size (160 × 120);
* the per-channel encryption keys and substitution tables.

## Routing switch commands: `ctx_router`

In the support FPGA, one router per device decides which source drives
the device's context lines. `mode` selects the source:

* **Host and FSM commands** are already registered at their source. They
  pass straight through, so `ctx_sw` arrives in the same clock as the
  FSM's other outputs, such as `Calc`.
* **A data-driven request** (`data_req` high for one clock, with
  `data_ctx`) is registered:
  * one clock later, `ctx_sw` and `data_ack` are pulsed;
  * the device is in the new context on the clock after that.
* **Requests from a source that `mode` does not select** are dropped.

The router counts the switches it issues from each source (`n_host`,
`n_fsm`, `n_data`). The testbenches use these counts to prove that each
mechanism occurred.

The real host path runs through PCI and the on-board processor, and has
a long latency. That path is outside this RTL. In this model, a host
request is just a one-clock pulse on `host_sw`.

## FSM-driven switching: motion detection

`motion_system` is built as follows:

    input FIFO -> CSRC A (csrc_motion) -> output FIFO
                    ^   |
        Ctx,CtxSw,Calc  Done (pins)
                    |   v
        host_fsm -> ctx_router

### The algorithm, split into contexts

Frames are 160×120 pixels of 8 bits, packed two per 16-bit word (9600
words per frame). CSRC A holds three contexts. They share one memory of
3 × 9600 words, with three regions: the previous frame, the difference
image and the filtered image.

| context | module    | does                                                                                     | clocks per word |
|---------|-----------|------------------------------------------------------------------------------------------|-----------------|
| `00`    | `md_diff` | reads the new frame from the FIFO; writes \|new − previous\| and then stores the new frame as "previous" | 3 |
| `01`    | `md_lpf`  | 4×4 box filter on the difference image: sum of rows r..r+3 and columns c..c+3, shifted right by 4 | 14 |
| `10`    | `md_bin`  | compares each filtered pixel with a fixed threshold (16); streams out 1 or 0 per pixel, still two per word | 2 |

Details of the filter:

* The window extends down and to the right of the output pixel.
* Rows and columns past the edge repeat the last row or column.
* For each output word, `md_lpf` reads 4 rows × 3 words in 12 clocks,
  then writes the result. At 160×120 this is 134,400 clocks per frame,
  by far the slowest stage.

Each stage is started by `calc`. It raises `done` when it has finished
the frame, and holds `done` until `calc` falls. This is the only
handshake the controlling FSM needs.

### The programmable state machine: `host_fsm`

The controller is a **table in memory**, not hard-wired logic. The host
loads it, so it is a different machine for each application:

* The address is `{present state, inputs}`. The entry holds
  `{next state, outputs}`.
* Each input bit is taken from any of the 16 pins coming back from the
  device. An input-select word chooses the pin.
* Each pin going to the device can be driven by any output bit. An
  output-map word chooses the bit.
* Outputs are registered together with the state. An entry therefore
  holds the outputs of the state it leads to (Moore style).

Host register map (writes only, one per clock):

| address             | contents                                                         |
|---------------------|------------------------------------------------------------------|
| `0x00 + {state,in}` | `[7:0]` outputs, `[11:8]` next state                             |
| `0x40 + i`          | input bit *i* reads pin `wdata[3:0]`                             |
| `0x50 + p`          | pin *p* is driven (`wdata[4]`) by output bit `wdata[2:0]`        |
| `0x60`              | `[0]` run, `[1]` return to state 0                               |

Pins:

* towards CSRC A: pins 0–1 `Ctx`, pin 2 `CtxSw`, pin 3 `Calc`;
* back from CSRC A: pin 0 `Done`, pin 1 input FIFO not empty, pin 2
  output FIFO has room.

The motion application loads a ten-state sequence:

    IDLE -> I2D -> DIFF1 -> DIFF --Done--> D2L -> LPF1 -> LPF --Done--> L2B -> BIN1 -> BIN --Done--> IDLE

* `I2D`, `D2L` and `L2B` pulse `CtxSw` with the next stage's context
  number, and hold `Calc` low. This clears the previous stage's `Done`.
* The `…1` states raise `Calc` and give `Done` a clock to fall.
* `DIFF`, `LPF` and `BIN` wait for `Done`.

`tb/motion_fsm_table_pkg.sv` builds the table words from a next-state
function and an output function. Use it as the worked example when
programming your own table.

## Data-driven switching: per-channel encryption

`enigma_system` is built as follows:

    input FIFO (bytes) -> pkt_ctrl (CSRC A) -> csrc_enigma (CSRC B) -> output FIFO
                              |  ctx_req/ack          ^ ctx, ctx_sw
                              +----> ctx_router (data mode) --+

### Packets: `pkt_ctrl`

A packet is a 5-byte header followed by its data. The header bytes, in
order:

1. unused
2. unused
3. channel
4. length, low byte
5. length, high byte

The controller works as follows:

1. It reads the header.
2. It waits until the encryptor device has no byte left in its pipeline.
   Otherwise the tail of the previous packet would be encrypted with the
   next channel's key.
3. It asks the router for the channel's context and waits for the
   acknowledge.
4. It passes the data bytes through while a 16-bit down-counter, loaded
   with the length, counts down to zero.

The header is not forwarded. Packets can be 0 to 65535 bytes long.

### The encryptors: `enigma_engine` and `csrc_enigma`

CSRC B holds four contexts, one encryption engine per channel. Each
engine has its own keys and substitution tables. Each engine is an
Enigma-like rotor machine reduced to arithmetic:

* **Rotors.** Rotor *n* maps byte `x` to `x + KEYn + offset_n (mod 256)`.
* **Return path.** The byte passes rotors 0, 1 and 2, then copies of
  rotors 2, 1 and 0. A pipelined circuit cannot send the byte back, so the
  return path is laid out as further stages.
* **Substitution.** Each nibble goes through a 16-entry table of 4-bit
  values. The high and low nibbles use different tables. Entry *i* is at
  bits `4i+3..4i` of a 64-bit constant.
* **Stepping.** The offsets step like an odometer:
  * `offset_0` advances with every byte;
  * `offset_1` advances when `offset_0` wraps;
  * `offset_2` advances when `offset_1` wraps.

  Each byte carries its offsets down the pipeline, so the return rotors
  use the positions that the forward rotors used.

Timing and stalls:

* Seven stages: one byte per clock, with a latency of 7 clocks.
* If the output is not taken, the whole pipeline holds.
* A disabled engine (its context is not active) keeps its bytes and its
  rotor positions. A channel's stream therefore continues from where it
  left off the next time its context is switched in.

`tb/enigma_ref_pkg.sv` has a plain function that computes the same
cipher. Use it to produce test vectors for a changed key or table.

The keys and tables in `csrc_pkg` are arbitrary constants chosen for this
design. Each substitution table is a permutation of 0–15, so the cipher
can be inverted.

## Host-driven switching: video filters

In `video_system`, CSRC A holds three filters, and the host selects one
with a switch request:

| context | filter                          | output   | frame store becomes |
|---------|---------------------------------|----------|---------------------|
| `00`    | pass-through, one frame late    | S        | new pixel           |
| `01`    | delay with fading               | S        | (S + new) / 2       |
| `10`    | difference                      | \|new − S\| | new pixel        |
| `11`    | same as `00`                    |          |                     |

*S* is the same pixel of the previous frame, held in a one-frame store in
the shared memory.

All three filters share the store and the word counter. A switch between
any two words therefore takes effect from the next word, and the frame
continues without a gap. Each word takes two clocks: one to read the
store, and one to output the result and write the store.

How fast the picture fades is this design's choice. The original demonstration
only names a "delay filter with fading". Taking the mean of old and new halves the old
image's weight with every frame.

## The logic cell: `cslc`

`cslc` is one cell of the device fabric, written at bit level. It
contains:

* a 4-input lookup table;
* a flip-flop;
* an output select, between the table output and the flip-flop;
* an output driver with an enable.

Every configuration item has four copies, one per context. Each context
is a 20-bit word, loaded serially (`cfg_en`, `cfg_ctx`, `cfg_bit`, MSB
first). Any context can be loaded while the cell runs.

| bits    | field     | meaning                                              |
|---------|-----------|------------------------------------------------------|
| `19:4`  | `lut`     | truth table: `lut[in]`                               |
| `3`     | `reg_out` | drive the flip-flop instead of the table output      |
| `2`     | `share`   | when leaving this context, copy its value to public  |
| `1`     | `use_pub` | when entering this context, start from public        |
| `0`     | `oe`      | output enable (ANDed with the `t_en` pin)            |

The flip-flop has a private register per context and one public
register. Sharing a value between contexts takes two steps:

1. The leaving context writes its value to the public register (`share`).
2. The entering context picks the value up (`use_pub`).

Both steps happen on the switching clock edge. The table is not sampled
in that clock.

The cell has no carry logic and no RAM mode. The device's arrays, pipes
and routing are not modelled either.

## Sizes and parameters

| parameter         | default | where                                 | note |
|-------------------|---------|---------------------------------------|------|
| `NUM_CTX`         | 4       | `csrc_pkg`, `ctx_switch`, `cslc`      | contexts per device |
| `W`, `H`          | 160, 120| motion, video                         | frame size; `W` must be even |
| `FIFO_DEPTH`      | 8192    | all three systems                     | the smallest of the 8K–64K range of the board |
| `THRESH`          | 16      | `md_bin`                              | static threshold; any value 0–255 |
| `KEY0..2`, `SBOX_*` | per channel | `enigma_engine`, from `csrc_pkg` | arbitrary constants |

A 160×120 frame (9600 words) is larger than an 8192-word FIFO. This
works because frames are streamed, so a whole frame never has to be
inside the FIFO at once. The motion device's memory holds exactly three
images (28,800 words).

## How far to trust it, and what differs

**Modelled.**

* The three switching strategies.
* Both applications, down to the bit, plus the video filters.
* The programmable table FSM.
* The one-clock context switch with frozen, per-context state.
* One logic cell with private and public registers.

**Behaviour chosen here, where the source description is silent.**

* All handshakes and latencies.
* The FSM register map and pin assignment.
* The filter window, edge handling, rounding and threshold value.
* The fading rule.
* The encryption keys and tables.
* Waiting for the encryptor to drain before a switch.
* The header byte order, taken from the packet layout.

**Not built.**

* The device fabric beyond one cell: arrays, pipes, routing and carry
  chains.
* The loading of contexts from a configuration cache when an application
  has more than four contexts. Only applications with four contexts or
  fewer run.
* Stalling the devices from the host for debugging.
* The host, the on-board processor, the PCI bridge and the video capture.
  Their FIFO and register ports are the top's ports.
* The host software that cuts the moving region out of the frame, using
  the binary image. The binary image leaves on `motion_out_*`.
* The board's "pass-through" context on CSRC B in the motion application.
  It is a plain wire here.

**Not comparable.** The area figures of the original work were measured
in equivalent gates of the device fabric. They cannot be compared with
anything this RTL produces.

## Simulating

Each `tb/tb_<module>.sv` is self-checking:

* It compares the module against an independent model.
* It ends by printing `TB_RESULT checks=N failures=M`.
* A watchdog stops it if it hangs.

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/csrc_pkg.sv tb/motion_fsm_table_pkg.sv tb/enigma_ref_pkg.sv tb/motion_ref_pkg.sv \
        tb/tb_rcm_top.sv --top-module tb_rcm_top -o sim
    ./obj_dir/sim

Replace `tb_rcm_top` with any other testbench name.

The block testbenches reduce the frame size and the FIFO depth to stay
short.

`tb_rcm_top` runs the whole top at its default sizes: 160×120 frames and
8K FIFOs. It runs in well under a minute. It:

* programs the FSM;
* runs two motion frames and checks both binary images;
* switches the motion device once from the host;
* sends 40 packets of 150–600 bytes on random channels;
* filters three video frames, one with each filter;
* configures the logic cell and passes a value across a switch.

It fails unless each of the following happened at least once:

* an FSM-driven switch;
* a host-driven switch;
* a data-driven switch;
* a wait for `Done`;
* a wait for the encryptor to drain;
* output back-pressure;
* public-register sharing.
