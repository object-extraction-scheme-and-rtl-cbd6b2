# Object-extracting camera node for a wireless sensor network

A camera node in a wireless sensor network usually watches a fixed scene. Sending
every 640×480 frame over a low-rate radio costs far more energy than looking at the
frame locally, so this node sends only what changed. A small, normally
clock-gated image block keeps a running-average background in an external SRAM.
It marks each pixel that differs from that background and finds the bounding box
of the changed region with run-length row and column scans. It can also compress
that box with a 5/3 wavelet transform. The always-on, low-frequency network
processor wakes the block for each job and then sends the object in short packets.
A light application-layer protocol carries the packets. It adds a CRC-8 to each
image packet, and routers keep a two-packet queue that forwards only packets
whose CRC checks.

The RTL here covers the whole processing system: power control, clock gate,
clock-domain crossing, image block, SRAM interface and the protocol hardware.
It does not include the network processor or the radio. Their signals are ports
of `wmsn_top`.

## Block map

```
 lclk domain (always on)                    hclk domain (gated)
 ───────────────────────                    ───────────────────
 np_cmd ──► power_ctrl ──ip_clk_en──sync2──► clk_gate ──gclk──► img_proc
            │   ▲                                               ├ camera_if   (camera pixels + row/col)
            │   └─en_ack──sync2◄─────────────┘                  ├ bgs_ctrl ── bg_sub (running average)
 np_cmd ──► cdc_msg (toggle handshake) ──────────────────────►  ├ obj_scan    (row/column run scans)
 np_sts ◄── cdc_msg ◄────────────────────────────────────────── ├ dwt53_2d    (5/3 DWT, 1–3 levels)
                                                                └ RAM mux ──► ext_ram_if ──► 2 × 256K×16 SRAM
 ptx_* ───► pkt_tx ── crc8 ──► bytes to radio                      (host port while idle)
 rx_*  ───► msg_rx ── crc8 ──► pkt_queue ──► fwd_* (router forwarding)
```

`wmsn_pkg` holds the shared widths, the command and status structs, the message
types and the RAM address functions.

## External memory map

Two 256K×16 asynchronous SRAMs share one address bus and appear as a single
512K×16 RAM (1 MByte). Address bit 18 selects the chip (`CE1`/`CE2`). Each word
serves one pixel, so a single access gives everything the image block needs for
that pixel:

| address (19 bits)                | contents                                          |
|----------------------------------|---------------------------------------------------|
| `{row[8:0], col[9:0]}`, row < 480 | `{B[7:0], F[7:0]}`: background byte, current-frame byte |
| `{4'b1111, row[8:0], col[9:4]}`   | Update flags of pixels `col[9:4]*16 … +15` of that row; bit `col[3:0]` |

Row addresses 480–511 are not used by pixels. Their upper part, starting at
`1111…`, holds one Update bit per pixel. This uses 19,200 words, and the area
ends exactly at 2^19 − 1.

`ext_ram_if` offers a request/acknowledge read port and write port.

- **Read:** drives `CE`, `OE`, `UB` and `LB` for one cycle, then samples the data.
  `Read_ack` comes 2 cycles after the request is seen.
- **Write:** drives `CE` and `WE` for one cycle, then holds the data for one more
  cycle with `WE` high. `Write_ack` comes 3 cycles after the request.
- **Back-to-back:** no new request is taken in an ack cycle, so a read occupies
  3 cycles and a write 4.
- **Conflicts:** when both ports ask in the same cycle, the read wins.
- **Bus:** the data buses are split into `_o`, `_i` and `_oe` signals. The
  tristate buffer belongs to the pad.

## Background subtraction (`bg_sub`, `bgs_ctrl`)

For each pixel, with F the new value and B the stored background:

```
mag    = |F − B|
B_new  = B + sign(F − B) · (mag >> asel)     (clamped to 0…255)
Update = mag > Thr
```

This is a running Gaussian average with α = 1/2^asel, computed with a shifter
instead of a multiplier. The background takes `B_new` only where `Update` is 1.
Elsewhere the old background is kept. `bg_sub` is combinational.

`bgs_ctrl` handles each pixel as follows:

1. Read `{B, F_old}`.
2. Write `{B', F}`.
3. Collect the Update bit.
4. After every 16th column, write the collected flag word.

The next pixel is taken in the cycle that acknowledges the last write. A pixel
therefore costs 7 cycles, plus 4 for the flag word after every 16th, which is
7.25 cycles on average. `camera_if` has an 8-pixel FIFO, so the camera may
deliver a pixel every 8 cycles or slower. `OP_LOAD_BG` stores the
frame as both background and current image. This is how the first background is
obtained.

## Finding the object (`obj_scan`)

Noise produces isolated Update bits. An object produces runs of them. The scan
reads only the flag area.

- **Row scan:** one flag word per access. A single run counter crosses the 16
  bits of each word in one cycle. A row is a *hit* when it holds a run of at
  least `diff_thr` ones.
- **Column scan:** walks each group of 16 columns from the top row to the bottom
  row, with 16 vertical run counters.
- **Result:** the box spans the first to last hit row and the first to last hit
  column.

A run counts when its length is *equal to or greater than* the threshold. This
follows the worked 16×8 example of the original scheme, where runs of exactly
three count when the threshold is 3. The unit test includes that example. The
scan needs about 2 × 19,200 reads for a full frame, and it uses no internal
memory.

## Wavelet transform (`dwt53_2d`)

This is the JPEG2000 reversible 5/3 filter, applied by lifting for one to three levels:

```
predict  d = x_odd  − floor((x_left + x_right) / 2)
update   s = x_even + floor((d_left + d_right + 2) / 4)
```

The ends use symmetric extension. The box's current-frame pixels are loaded
into an internal buffer of `MAX_W × MAX_H` (160 × 100) 12-bit words. The engine
transforms all rows in place, then all columns, at one lifting step per cycle.

Each further level repeats the same passes on the LL samples of the previous
level. In the buffer those samples sit at every 2^l-th row and column, so the
engine only shifts its addresses. A level runs only while both sizes of its
band are at least 2. Level l has sizes w_l = ⌈W/2^l⌉ and h_l = ⌈H/2^l⌉, and a
transform takes Σ 2·w_l·h_l cycles: 2·W·H for one level, 2.625·W·H for three.

The coefficients stay interleaved in the buffer. The `dwt_rd_row`/`dwt_rd_col`
read port addresses them in the usual multi-level (Mallat) layout. The coarsest
LL band is at the top left. Each level's HL, LH and HH bands lie to the right of,
below and diagonal to the next coarser region. For each coordinate, the read
port finds the finest level whose high band contains it. The finer of the row
and column levels decides the band, and the position in the buffer follows from
it.

**Difference from the original design:** the original uses a parallel DWT
processor that can also transform a whole frame. That processor is not
reproduced here. This engine is deliberately simple and clips boxes larger than
160×100 to their top-left 160×100 corner. The number of levels comes from the
command.

## Commands, power and the clock boundary

The network processor sends 32-bit commands (`cmd_t`) and receives 46-bit
statuses (`sts_t`). The command fields are:

| bits  | field      | meaning                                          |
|-------|------------|--------------------------------------------------|
| 31:28 | opcode     | 1 `LOAD_BG`, 2 `EXTRACT`, 3 `DWT`                 |
| 26:24 | `asel`     | α = 1/2^asel                                      |
| 23:16 | `thr`      | threshold for the Update test                    |
| 15:8  | `diff_thr` | run threshold for the scans                      |
| 7:6   | `levels`   | DWT levels, 1 to 3 (0 is taken as 1)             |

The status returns the opcode, `found` and the box (`top`, `bottom`, `left`,
`right`). This encoding is this design's own.

The image block sleeps by default. A pending command moves `power_ctrl` from
INACTIVE to WAKE, which raises the clock enable. The enable is synchronised
into hclk, where a latch-based gate releases `gclk`. It is then synchronised
back. Only when it returns (ACTIVE) does `cdc_msg` release the command into
the hclk domain. The status returns the same way. Its arrival moves the unit to
SLEEP, and once the gate is seen closed, back to INACTIVE.

While the clock is stopped, the registers keep their values. No reset is
applied on sleep, so the box found by `EXTRACT` is still there for `DWT`.
`cdc_msg` moves a held data word with a request toggle and an acknowledge
toggle, each through a two-flop synchroniser. The only signals that cross are
toggles.

The reset synchronisers (`sync2`) power up at the released level. A reset
therefore always appears as an edge on the per-domain resets.

While no command runs, the network processor can read and write the external
RAM through the host port. This is how the extracted pixels are fetched for
sending.

## Protocol hardware (`crc8`, `pkt_tx`, `msg_rx`, `pkt_queue`)

Every message starts with `0xAA` followed by a type byte:

| message               | type | payload                                  |
|-----------------------|------|------------------------------------------|
| IMAGE PACKET          | AA   | ID (2 bytes), N data bytes, CRC-8        |
| CAMERA SETUP          | 00   | 4 bytes                                  |
| IMAGE QUERY           | 01   | —                                        |
| IMAGE SIZE            | 02   | 2 bytes                                  |
| ACK                   | 03   | ID (2 bytes)                             |
| NACK                  | 04   | ID (2 bytes)                             |
| START OF TRANSMISSION | 05   | packet size (1 byte)                     |
| END OF TRANSMISSION   | 06   | —                                        |

The packet size N ranges from 16 to 256 bytes. Each image packet adds 5 bytes
of overhead.

- **CRC-8:** polynomial x⁸+x²+x+1 (0x07), initial value 0, MSB first, no final
  XOR. It covers the ID and the data bytes.
- **Byte order:** 16-bit fields are sent high byte first.
- **Packet size:** the START OF TRANSMISSION byte holds N − 1, so that 256 fits
  in one byte.
- **`pkt_tx`:** frames a packet from a valid/ready byte stream.
- **`msg_rx`:** parses every message type. It reports `crc_ok` for image packets
  and holds `in_transmission` between START and END OF TRANSMISSION, the period
  in which other nodes must stay silent.
- **`pkt_queue`:** a router buffer sized for two packets of 261 bytes. Each
  incoming packet is written tentatively. When its last byte arrives, the
  packet is committed if the CRC was good and discarded otherwise. Only
  committed packets are forwarded, with the leading `0xAA` restored.

## What is the original scheme and what is this design's choice

**Taken from the original scheme:**

- the RAM organisation and address map;
- the background-subtraction equations and their shifter form;
- the Update-flag storage;
- the run-length row and column scans;
- the 5/3 filter and the choice of 1 to 3 levels;
- the sleep/active power scheme under network-processor control;
- the cross-domain message path;
- the message set;
- CRC checking at routers;
- the 2-packet queue and the 16–256-byte packets.

**This design's own choices** (each module's header says which apply):

- SRAM timing and active-low pins;
- the camera signalling (assumed synchronous to hclk);
- the command and status encoding;
- the CRC polynomial and the byte order;
- the N − 1 size byte;
- the toggle handshake;
- the DWT engine and its 160×100 buffer;
- inclusive run thresholds.

**Not included:**

- the network processor;
- the radio interfaces;
- a DWT of a whole frame;
- the original parallel DWT processor.

## Timing against the original figures

At 50 MHz the original reports 2,457,600 cycles to process a 640×480 frame. That
is 8 cycles per pixel.

Background subtraction here needs 7.25 cycles per pixel. It therefore keeps up
with a camera that delivers one pixel every 8 cycles, and the frame time is set
by the camera. The full-size testbench runs at exactly that rate, with no FIFO
overflow, and measures the cycles the image block stays awake:

| command                                         | image-clock cycles awake |
|-------------------------------------------------|--------------------------|
| `LOAD_BG` (one 640×480 frame)                    | 2,459,648                |
| `EXTRACT` (frame plus row and column scans)      | 2,574,848                |
| `DWT`, 3 levels, 160×80 box (load plus lifting)  | 72,036                   |

A 1-level DWT of a 160×100 object takes 3·16,000 cycles to load and 2·16,000 to
transform, 80,000 in all.

## Simulating

Each unit has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`. Testbenches that use the RAM need the SRAM model
`tb/sram_256kx16_model.sv`, a behavioural model with split IO. For example:

```
verilator --binary --timing --assert -Irtl rtl/wmsn_pkg.sv rtl/*.sv \
    tb/sram_256kx16_model.sv tb/tb_wmsn_top.sv --top-module tb_wmsn_top -o sim
./obj_dir/sim
```

| testbench        | what it does                                              | time          |
|------------------|-----------------------------------------------------------|---------------|
| `tb_wmsn_top`    | end-to-end run on a 32×8 frame (see below)                | under a second |
| `tb_wmsn_full`   | the top at its default size with no parameter overridden (see below) | about 10 s |
| `tb_wmsn_protocol` | the top at its defaults: packets of 16, 64, 128 and 256 data bytes through the router path, about a third of them corrupted | a few seconds |
| `tb_<unit>`      | one test per unit                                         | short         |

`tb_wmsn_top` performs these steps:

1. Captures a background.
2. Extracts an 11×4 object among noise pixels.
3. Checks every RAM word against the running-average rule.
4. Transforms the box.
5. Frames the pixels into three packets and replays them into the receive side
   with one packet corrupted.

It counts each mechanism and fails if one never occurs:

- wake-up and gated clock;
- update taken and refused;
- noise rejection and object found;
- DWT run and host access;
- CRC pass and CRC drop, and forwarding;
- transmission on and off;
- ACK and NACK.

`tb_wmsn_full` performs these steps:

1. Captures two 640×480 frames.
2. Finds a 160×80 object exactly.
3. Checks sampled RAM words.
4. Runs a 3-level DWT of the box and checks every coefficient against a
   reference model in the testbench.

Parameters of `wmsn_top` are `COLS`, `ROWS` (frame size) and `MAX_W`, `MAX_H`
(DWT buffer). Smaller values give fast simulations.
