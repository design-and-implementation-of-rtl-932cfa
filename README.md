# Width-adjustable asynchronous FIFO: 24-bit pixels in, 128-bit bus words out

A camera delivers 24-bit RGB888 pixels on its own clock; a 128-bit Avalon
bus running on another clock has to carry them away in bursts of sixteen
beats. This design bridges the two with one asynchronous FIFO whose write
and read ports have different widths. The trick is to fix the RAM word at
32 bits and convert on both sides of it:

* on the way in, four 24-bit pixels (96 bits) are packed into exactly three
  32-bit RAM words, so no RAM bit is wasted;
* on the way out, the read pointer counts 128-bit words, i.e. one step of
  it covers four RAM words, and each read fetches four 32-bit words at once
  and splices them into one 128-bit word.

Everything else is a classic Gray-pointer asynchronous FIFO: each pointer
crosses to the other clock domain as a Gray code through two flip-flops, is
decoded back to binary, and the two pointers are compared for `full`,
`empty` and a programmable `prog_full`. `prog_full` rises at 64 stored
words, which is exactly one 16-beat burst of 128 bits, and it is what starts
a bus burst.

The RTL is IEEE 1800-2017 SystemVerilog, synthesizable, and is checked with
Verilator (lint and simulation) and the slang front end of Yosys.

## Data path

```
 din_clk domain                                    dout_clk domain
 +------+  24  +---------------+ 32  +---------------+ 4x32 +----------------+ 128 +---------------------+
 | vcam |----->| width_conv_in |---->|     dpram     |----->| width_conv_out |---->| avalon_burst_master |--> Avalon
 +------+      +---------------+     | 128 x 32 bit  |      +----------------+     +---------------------+    slave
    ^ ready=!full      |  wr_en      +---------------+             ^ row                  |  ^
    |                  v                ^ waddr                    |                      |  | prog_full (2-FF)
    |            +-----------+          |                    +-----------+   dout_en      |  |
    +------------|  wr_ctrl  |----------+                    |  rd_ctrl  |<---------------+  |
     full        |  full     |  wptr (Gray) --2FF-->         |  empty    |                   |
     prog_full --|  prog_full|  <--2FF-- rptr (Gray)         +-----------+                   |
                 +-----------+ -------------------------------------------------------------+
```

`asyc_fifo` contains `width_conv_in`, `wr_ctrl`, two `sync_2ff`, `rd_ctrl`,
`dpram` and `width_conv_out`. `vcam_fifo_bus_top` adds the camera
(`vcam`), a synchroniser for `prog_full` and the bus module
(`avalon_burst_master`). The host behind the bus is not part of the RTL;
its Avalon slave side is brought out as ports.

## Packing 24-bit pixels into 32-bit words (`width_conv_in`)

The pixels are laid end to end as one bit stream, the first pixel in the
least significant bits, and the stream is cut into 32-bit words:

| RAM word | bits 31..24 | bits 23..16 | bits 15..8 | bits 7..0 |
|----------|-------------|-------------|------------|-----------|
| word 0   | p1[7:0]     | p0[23:16]   | p0[15:8]   | p0[7:0]   |
| word 1   | p2[15:8]    | p2[7:0]     | p1[23:16]  | p1[15:8]  |
| word 2   | p3[23:16]   | p3[15:8]    | p3[7:0]    | p2[23:16] |

The block does not wait for four pixels. It keeps a residue register with
the bits that did not yet make a full word (0, 24, 16 or 8 bits in turn)
and emits a word, combinationally and in the same cycle, whenever residue
plus the incoming pixel reach 32 bits. Pixels 1, 2 and 3 of each group of
four therefore each produce a write; pixel 0 only fills the residue. Since
every pixel produces at most one word, one free RAM word is always enough
to accept one pixel, which keeps `full` simple. The block is written for any
input width up to the word width (`IN_W <= MEM_W`).

A consequence: the bits of an incomplete group at the end of the data stay
in the residue (and a final 128-bit word with fewer than four RAM words
stays unreadable) until more input completes them. There is no flush.

## Reading 128 bits at a time: the pointer arithmetic

This is the part that needs care. The two sides count in different units:

| pointer | domain   | counts           | width (DEPTH = 128) |
|---------|----------|------------------|---------------------|
| write   | din_clk  | 32-bit RAM words | 8 bits (7 + wrap)   |
| read    | dout_clk | 128-bit words    | 6 bits (5 + wrap)   |

Both carry one bit more than the address, as usual, so full and empty can be
told apart. Because 128 is 4 x 32, the read pointer is simply the word
pointer divided by four, and the wrap bits line up: the write pointer wraps
after 256 words, the read pointer after 64 rows of four words.

* **Write domain (`wr_ctrl`).** The read pointer arrives in Gray code,
  is decoded, and is multiplied by four (shifted left by two): this is the
  read-pointer expansion. Then `used = wptr - 4*rptr` in 8-bit arithmetic,
  `full = (used == 128)` and `prog_full = (used >= 64)`.
* **Read domain (`rd_ctrl`).** The write pointer arrives in Gray code, is
  decoded, and is divided by four (shifted right by two), giving the number
  of complete 128-bit words written. `empty` is high when the read pointer
  equals that number, i.e. while fewer than four unread RAM words exist.
* **Addressing (`width_conv_out`).** The read pointer without its wrap bit
  is the row; the four RAM addresses are `row*4 + 0..3`, and word `k` goes
  to `dout[32k +: 32]`. Read in this order, the output is the same
  little-endian byte stream the camera produced: a 128-bit word holds 16
  bytes, i.e. 5 1/3 pixels, so pixels straddle output words.

`dpram` has one 32-bit write port and a combinational read port that
returns the four addressed words together; `width_conv_out` holds the
128-bit `dout` register that captures them on each accepted read. Since the
four addresses are always consecutive and aligned, the RAM maps onto four
32-bit banks selected by the two low address bits, and a synthesis tool can
merge the `dout` register into block-RAM output registers.

## Crossing the clock domains

Each pointer is registered in Gray code in its own domain (`bin2gray`,
`g = b ^ (b >> 1)`), passes through a two-flop synchroniser (`sync_2ff`),
and is decoded back to binary (`gray2bin`) before any arithmetic. Only one
Gray bit changes per pointer step, so a synchroniser that catches a bit in
transition yields either the old or the new pointer, never a wild value.

The synchronised pointer always lags. In the write domain that makes `used`
too large, never too small, so `full` and `prog_full` can stay high a few
clocks longer than necessary but never let the RAM be overwritten. In the
read domain it makes `empty` stay high a few clocks longer but never allows
an over-read. This costs a little throughput and no correctness.

`prog_full` is a registered level in the write domain; the top passes it to
the bus clock through another `sync_2ff`.

## Interface and timing of `asyc_fifo`

| port        | dir | width | meaning                                                  |
|-------------|-----|-------|----------------------------------------------------------|
| din_clk     | in  | 1     | write clock                                              |
| din_rst_n   | in  | 1     | write-domain reset, asynchronous, active low             |
| din         | in  | 24    | input data                                               |
| din_en      | in  | 1     | write enable; ignored while `full` is high                |
| full        | out | 1     | all 128 words used                                       |
| prog_full   | out | 1     | at least 64 words used                                   |
| dout_clk    | in  | 1     | read clock                                               |
| dout_rst_n  | in  | 1     | read-domain reset, asynchronous, active low              |
| dout_en     | in  | 1     | read enable; ignored while `empty` is high                |
| dout        | out | 128   | data of the last read, loaded at the edge that reads it |
| empty       | out | 1     | fewer than four unread 32-bit words                      |

* A write happens on a `din_clk` edge with `din_en && !full`. `full` and
  `prog_full` are registers computed from the pointer after that write,
  so they change at the same edge: into an empty FIFO, `full` rises at the
  edge that takes the 171st pixel (171 x 24 >= 128 x 32) and `prog_full`
  at the edge that takes the 86th (64 words).
* A read happens on a `dout_clk` edge with `dout_en && !empty`; `dout`
  changes at that edge and holds until the next read.
* The first 128-bit word becomes readable (`empty` low) at most about three
  `dout_clk` edges after its fourth RAM word is written (Gray register, two
  synchroniser stages, flag register).
* Both resets should be asserted together. After reset the pointers are
  zero, `empty` is high, `full` and `prog_full` are low. RAM contents are
  not reset; `dout` is undefined until the first read.

An assertion in `asyc_fifo` checks that no RAM word is ever written while
`full` is high.

## Feeding the bus (`avalon_burst_master`)

The bus module writes bursts of 16 beats of 128 bits on an Avalon
memory-mapped master port (`burstcount = 16`, all byte enables set). It
starts a burst when the synchronised `prog_full` is high, holds address and
burstcount for the whole burst, and then advances the address by 256 bytes
(linear from `BASE_ADDR`, 32-bit address).

Beats are fetched one ahead: the master pops the FIFO whenever beats of the
current burst remain to be fetched, the FIFO is not empty, and the word now
on `dout` has been sent (or none is held). Because the FIFO's `dout` only
changes on a read, `dout` is wired directly to `avm_writedata`, and
`avm_write` is high while it holds an unsent beat. With a ready slave and
data present the burst leaves at one beat per clock. Under `waitrequest`
the command and data stay put (checked by an assertion). Because `prog_full`
is conservative, a burst can occasionally start with fewer than 16 words
present; the master then drops `avm_write` between beats until the FIFO
has data, which Avalon permits.

## The camera (`vcam`)

A test-pattern source standing in for a camera: endless 640 x 480 frames in
raster order, pixel `{r, g, b} = {x[7:0], y[7:0], x[7:0]^y[7:0]^frame[7:0]}`,
with `sof` on the first pixel of a frame and `eol` on the last of a line.
It offers pixels with a valid/ready handshake: `pix_valid` follows `en`,
and a pixel advances only when `ready` (the FIFO's `!full`) is high, so
nothing is lost when the bus falls behind. Because the pattern depends only
on position, a receiver can check every pixel.

## Parameters

| parameter     | default | where                          | meaning                          |
|---------------|---------|--------------------------------|----------------------------------|
| `IN_W`        | 24      | `fifo_pkg`, `asyc_fifo`        | input width                      |
| `MEM_W`       | 32      | `fifo_pkg`, `asyc_fifo`        | RAM word width                   |
| `OUT_W`       | 128     | `fifo_pkg`, `asyc_fifo`        | output / bus width               |
| `DEPTH`       | 128     | `fifo_pkg`, `asyc_fifo`, top   | RAM depth in words               |
| `PROG_FULL_N` | 64      | `fifo_pkg`, `asyc_fifo`, top   | prog_full threshold in words     |
| `BURST_LEN`   | 16      | `fifo_pkg`, top, bus master    | Avalon burst length              |
| `H_RES`,`V_RES`| 640, 480 | top, `vcam`                  | camera frame size                |

`asyc_fifo` stops elaboration with an error unless `IN_W <= MEM_W`,
`OUT_W = RATIO * MEM_W` with `RATIO` a power of two of at least 2, `DEPTH`
a power of two of at least `2*RATIO`, and `PROG_FULL_N <= DEPTH`. For the
bus to be able to start full bursts, `PROG_FULL_N` should equal
`BURST_LEN * OUT_W / MEM_W`.

## Which parts are given and which are chosen

Taken from the design this RTL implements: the three-part structure of the
FIFO; the 24/32/128-bit widths; packing four pixels into three words;
reading four words at a time by scaling the read pointer by four in the
write domain; Gray-coded pointers with two-flop synchronisers, decoded to
binary before the flag comparison; `prog_full` at 64 words for 16-beat
bursts on a 128-bit Avalon bus; a virtual camera as the source; the port
names `din`, `din_clk`, `din_en`, `dout`, `dout_clk`, `dout_en`, `full`,
`empty`, `prog_full`; a RAM of 128 words of 32 bits.

Choices of this implementation: the little-endian bit order of the packing
and of the 128-bit splice; registered flags; the `dout` register loaded at the edge that accepts the read;
active-high `empty`; asynchronous active-low resets; inputs ignored while
full; the camera's pattern, frame size and valid/ready stall; the bus
master's addressing and fetch scheme; synchronising `prog_full` into the bus
clock.

Not covered: a flush of a trailing partial word; the host behind the bus;
narrowing conversions (wide in, narrow out), which the structure suggests
but which are not built here.

## Files

| file                          | contents                                            |
|-------------------------------|-----------------------------------------------------|
| `rtl/fifo_pkg.sv`             | default sizes, `rgb888_t`                           |
| `rtl/bin2gray.sv`, `rtl/gray2bin.sv` | Gray code conversion                         |
| `rtl/sync_2ff.sv`             | two-flop synchroniser                               |
| `rtl/width_conv_in.sv`        | 24 -> 32 bit packer                                 |
| `rtl/dpram.sv`                | dual-port RAM, 32-bit write, four-word read         |
| `rtl/width_conv_out.sv`       | read address expansion, 4 x 32 -> 128 dout register |
| `rtl/wr_ctrl.sv`, `rtl/rd_ctrl.sv` | pointers and flags of each domain              |
| `rtl/asyc_fifo.sv`            | the FIFO                                            |
| `rtl/vcam.sv`                 | camera test source                                  |
| `rtl/avalon_burst_master.sv`  | bus module                                          |
| `rtl/vcam_fifo_bus_top.sv`    | complete system                                     |
| `tb/tb_<module>.sv`           | a self-checking testbench per module                |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`; each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/fifo_pkg.sv tb/tb_asyc_fifo.sv --top-module tb_asyc_fifo -Mdir obj_fifo
./obj_fifo/Vtb_asyc_fifo
```

Replace `tb_asyc_fifo` with any other testbench. What they check:

* `tb_asyc_fifo`: fills an empty FIFO with 200 random pixels and no reads
  (exactly 171 accepted; `prog_full` after pixel 86, `full` after 171,
  cycle-exact; `empty` falls within four read clocks of the fourth word),
  drains it (32 words, each compared with the reference bit stream), then
  runs about 15,000 random pixels in three parts: a read clock slower than
  the write clock with reads always on, a read clock faster than the write
  clock with reads always on, and the fast read clock with rare reads so
  that the FIFO fills. Every 128-bit word is checked, and `empty` must
  occur in the first two parts and `full` in the third.
* `tb_vcam_fifo_bus_top`: the whole system at its default size. The
  testbench is the Avalon slave, with random and long `waitrequest`
  stretches so the FIFO fills and the camera stalls. It receives one whole
  640 x 480 frame (57,600 beats, 3,600 bursts), checks every pixel against
  the pattern and every burst's burstcount and address, and requires that
  `prog_full` rose, the camera stalled on `full`, `waitrequest` held beats
  and the FIFO ran empty. It runs in about a second.
* The unit testbenches check each block against an independent reference:
  the Gray table and single-bit-change property, the synchroniser's
  two-clock delay, the packer's bit stream (with a hand-worked four-pixel
  case), the RAM against a model, the splice and addresses, the flag
  conditions of each controller against pointer counts, the camera's
  pattern and stalls, and the bus master's beat order, burst shape and its
  16-beats-in-16-clocks rate.

The simulations check functional behaviour with ideal clocks; metastability
itself cannot be simulated here, so the synchroniser design rests on the
Gray-code argument above.
