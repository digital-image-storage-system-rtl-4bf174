# USB-fed image store on two paralleled NAND flash chips

This RTL is the FPGA logic of a digital image store. Image frames come from a
PC over an FT245 USB FIFO chip and are written into two 8-bit NAND flash chips
(K9WBG08U1M class). Later they are read back to the PC. The design has two
main ideas:

* **Two chips, one bus.** The two 8-bit chips share chip enable, CLE, ALE,
  WE# and RE#. Each gets its own half of a 16-bit data bus. One write strobe
  therefore stores a 16-bit word, one byte in each chip, and every command
  and address reaches both chips at once. Each chip keeps its own ready/busy
  (R/B#) line.
* **Alternating page program.** A NAND page program has two phases. First the
  command, the address and 4096 bytes are loaded over the bus (102.4 us at
  25 ns per byte). Then the chip programs the page internally (200 to 700 us).
  Doing one page at a time gives 4096 B / (200 us + 102.4 us) = 13.5 MB/s.
  This controller instead loads the next page into a different plane while
  earlier planes are still programming. It rotates over eight plane slots, so
  a plane is loaded again only after seven other page loads: 7 x 102.4 us =
  717 us, longer than the worst-case 700 us program time. The bus never waits
  for programming. The store rate is then set by bus loading alone: 79.8 MB/s
  at an 80 MHz clock, measured in simulation.

Stored data can also leave on a 16-bit parallel port to an LVDS serializer
(MAX9247) instead of going to USB. 16-bit words that come back on a feedback
LVDS link, through a DS92LV18 deserializer on its own clock, can be uploaded
to the PC. The serializer and deserializer chips, the RS-422 PCM interfaces
(SN65HVD10) and the PC software are not part of this RTL (see "What is not
here").

## Data path

```
 FT245 USB FIFO chip                                       two NAND chips
   D0..D7, RXF#, TXE#,          store path                  CE#[1:0], CLE, ALE,
   RD#, OE#, WR                                             WE#, RE# (shared)
        |        +-----------+   +-----------+   +----------+   +-----------+
        +------->| ft245_if  |-->|byte_to_word|-->| data_fifo|-->| nand_ctrl |<==> io[7:0]  chip 1
                 |           |   +-----------+   | half_full|   |  + bbt_ram|<==> io[15:8] chip 2
                 |           |<--word_to_byte<--+------------------|           |<--  R/B# per chip
                 +-----------+  read-back/upload  |                  +-----------+
                                                  |  fb_upload            |  rd_to_ser
                          async_fifo <------------+                       +--> ser_d/ser_de
   des_clk, des_d, des_valid --> (deserializer clock -> system clock)          (LVDS serializer)
```

| module | role |
|---|---|
| `img_store_top` | wires the chain together, takes the host's operation requests |
| `ft245_if` | strobe sequencing for the FT245 FIFO chip: reads when RXF# is low, writes when TXE# is low, never both at once |
| `byte_to_word` | two USB bytes become one 16-bit word: first byte goes to chip 1 (bits 7:0), second to chip 2 (bits 15:8) |
| `data_fifo` | store FIFO, 8192 words, with a half-full flag |
| `nand_ctrl` | the flash controller: power-up invalid-block scan, erase, alternating page program, read-back |
| `bbt_ram` | list of invalid block-group addresses, filled by the scan |
| `word_to_byte` | read-back words become bytes, low byte first |
| `async_fifo` | 1024-word dual-clock FIFO for feedback words; counts words dropped when full |
| `img_store_pkg` | NAND command codes and the operation type `op_e` |

## Flash organisation and the write order

Each chip enable sees 8192 blocks of 64 pages of 4096 data bytes per chip.
The blocks are spread over four planes:

| plane | blocks |
|---|---|
| 0 | even blocks of 0..4095 |
| 1 | odd blocks of 0..4095 |
| 2 | even blocks of 4096..8191 |
| 3 | odd blocks of 4096..8191 |

A **group** is named by an even block address `b` in 0..4094. It is made up
of blocks `b`, `b+1`, `b+4096` and `b+4097`, one in each plane.

A **plane slot** `s` (0..7) is the pair (chip enable `s/4`, plane `s%4`).
Eight slots need eight units that program independently. Four planes per
chip enable and two chip enables per chip give eight. The use of two chip
enables is this implementation's own step; see "Departures" below.

A store pass runs over three nested loops:

```
for group b = 0, 2, 4, ... 4094        (invalid groups skipped)
  for page p = 0 .. 63
    for slot s = 0 .. 7
      wait until both chips' R/B# for chip enable s/4 is high
      80h, 5 address cycles (column 0, row = block(s)*64 + p)
      4096 data cycles, each one only while the FIFO is at least half full
      10h
```

The innermost step is the heart of the design. It loads slot `s` and goes
straight on to slot `s+1` without waiting for the program to finish. When the
loop comes back to slot `s` for page `p+1`, seven page loads have passed.
With a two-clock bus cycle, each load takes 2*(1+5+4096+1)+7 = 8213 clocks.
Seven loads are 718.6 us at 80 MHz, more than a 700 us program. Before each
command the controller still checks R/B#. In a correctly timed system that
check never has to wait during a store pass, and the full-size rate testbench
checks that it does not.

**The half-full rule.** A word goes to the flash only while the FIFO holds at
least half its depth, which is one full page at the default size. This keeps
a page load from stalling halfway when the USB side hiccups. It has a
consequence for the host: the last 4096 words in the FIFO are not stored
until more data arrives. A host that wants its whole stream stored must send
at least FIFO_DEPTH/2 words of padding after it, then request a stop. Words
left in the FIFO stay there and lead the next store pass.

**Ending a pass.** A store pass ends after group 4094 is full (the flash is
full) or, after `stop_req`, at the end of the page being loaded. Either way
the controller waits until every R/B# is high, then latches `pages_written`.

## Invalid blocks

The scan starts right after reset. For every group it reads the first spare
byte (column 4096) of page 0 of all eight blocks, on both chips. A value
other than FFh marks the whole group invalid, even if only one block in one
chip is bad. The group's address is appended to `bbt_ram`. The list is in
ascending order because the scan walks groups in order. `init_done` rises
when the scan ends.

Erase, store and read walk the same group order. Each keeps a pointer into
the list. When the current group equals the entry under the pointer, the
group is skipped and the pointer advances. There is no per-block flag table,
only the list and one comparator. Because of this, a read-back visits exactly
the pages the store pass wrote, in the same order.

## Flash bus timing

Each command, address, data-in or data-out cycle takes two clocks: strobe
low, then strobe high. Data and CLE/ALE are held through the high clock.
Chip enable stays low until one clock after the last strobe has risen. At
80 MHz a cycle is 25 ns, which is 40 MB/s per chip and 80 MB/s for the pair.

| operation | sequence |
|---|---|
| page program | 80h, col lo, col hi, row 0, row 1, row 2, data..., 10h |
| page read | 00h, 5 address cycles, 30h, wait tWB then R/B#, data out with RE# |
| block erase | 60h, row 0, row 1, row 2, D0h |

A row is `block*64 + page`. Commands and addresses are copied onto both
halves of the bus. After every confirm command, the controller waits `TWB+1`
clocks before it looks at R/B# again. R/B# passes through a two-flop
synchroniser, and this wait lets the busy state reach the controller first.

## USB FIFO interface

`ft245_if` reads a byte like this:

1. RXF# is low and the last received byte has been taken.
2. OE# goes low, then RD# goes low for `USB_STROBE` clocks.
3. The byte is sampled, then RD# and OE# return high.

It writes a byte like this:

1. TXE# is low and a byte is waiting.
2. The byte is driven onto D0..D7 and WR is held high for `USB_STROBE` clocks.
3. WR is dropped; the falling edge hands the byte over.

After each transfer there is a `USB_GAP`-clock pause before the flags are
sampled again. Reads take priority. One byte costs `3+USB_STROBE+USB_GAP`
clocks, 7 with the defaults. The pins are treated as synchronous to the
controller clock.

## Operating it

| signal | use |
|---|---|
| `init_done` | power-up scan finished; operations are accepted after this |
| `op`, `op_start` | `OP_ERASE`, `OP_WRITE` (store) or `OP_READ` (read-back), taken while `busy` is low |
| `stop_req` | during a store: finish the current page and end |
| `busy` | an operation (or the scan) is running |
| `pages_written` | pages stored by the last store pass; a read-back returns this many |
| `bad_groups` | number of invalid groups found |
| `fifo_level` | words waiting in the store FIFO |
| `rd_to_ser` | read-back goes to the serializer port `ser_d`/`ser_de` (one word every two clocks, never held off) instead of USB |
| `des_clk`, `des_d`, `des_valid` | feedback words from the deserializer, taken on `des_clk` |
| `fb_upload` | USB upload takes feedback words instead of flash read-back |
| `fb_overflows` | feedback words dropped because the feedback FIFO was full |

Change `rd_to_ser` and `fb_upload` only while no read-back or upload is
running. The paths switch between whole words, so a change in mid-stream
loses nothing, but it does interleave the two streams.

A typical session is: wait for `init_done`, erase, store (stream frames in,
pad, stop), then read back. During read-back the words leave through
`word_to_byte` and `ft245_if`. The read stalls when the host is slow (TXE#
high).

## Parameters

| parameter (top) | default | meaning |
|---|---|---|
| `PAGE_WORDS` | 4096 | words per page; one byte per chip per word |
| `PAGES` | 64 | pages per block |
| `BLOCKS` | 8192 | blocks per chip enable |
| `N_CE` | 2 | chip enables per chip; must be at least 2 (slots = 4*N_CE) |
| `FIFO_DEPTH` | 8192 | store FIFO words; half of it is the threshold for writing to flash |
| `FB_DEPTH` | 1024 | feedback FIFO words (power of two, at least 4) |
| `USB_STROBE`, `USB_GAP` | 2, 2 | FT245 strobe width and pause, in clocks |

`nand_ctrl` also has `SPARE_COL`, the column of the invalid-block marker
(default `PAGE_WORDS`), and `TWB`, the wait after a confirm command
(default 4).

## Departures and own choices

The published system gives the pin sharing, the separate R/B# lines, the
plane layout, the write flow (slot, page, group with block address + 2,
ending at block 4094), the half-full gating, whole-group invalidation and the
invalid-address list. This RTL adds or chooses the following:

* **Two chip enables per chip.** The write flow counts eight plane slots, and
  the timing argument counts seven loads between visits to a plane. A single
  die has four planes, so the eighth slot needs a second die. This RTL gives
  each chip two chip enables, shared between the two chips. `N_CE`=1 is not
  supported: with four slots a plane would be loaded again after only three
  other loads, before its program could end. Treat two chip enables as a
  hardware requirement.
* **R/B# behaviour assumed.** Per chip enable, R/B# is expected to drop only
  briefly after a program confirm, while the page moves into its plane. The
  plane then programs in the background. A part whose R/B# stays low for the
  whole program time will still work, because the controller waits, but it
  loses the overlap.
* **Commands, addressing and marker.** The NAND command codes, the five
  address cycles and the invalid-block marker location are the usual
  large-page NAND conventions. They were not taken from a datasheet of this
  exact part.
* **End of flash.** The pass ends after group 4094, so all 2048 groups are
  used. A literal reading of the flow chart, which increments first and then
  tests for 4094, would leave the last group unused.
* **Erase and read sequences.** The original names these operations but does
  not describe them. The sequences here are this RTL's own.
* **Serializer and feedback ports.** The original says the stored data goes
  out through the serializer, and that deserialized feedback words are
  uploaded to the PC. It does not describe the FPGA side of either. The
  plain data/enable ports, the select inputs, the dual-clock FIFO and
  dropping words on overflow are this RTL's own. The original sends three
  copies of the read-out: to the image store and transfer device, to the
  downstream equipment and back to the PC. Here each read-back goes to one
  destination.
* **Host control.** The stop request, the operation handshake, the byte order
  (first USB byte to chip 1) and the FIFO depth are this RTL's own.
* **TXE# polarity.** A write is made when TXE# is low, as on the real FT245.
* **USB rate.** The USB side is far slower than the flash: at most about
  11 MB/s here, and about 1 MB/s for a real FT245R. The 80 MB/s flash rate
  only matters once the FIFO has been filled.

## What is not here

There is no RTL for the following:

* the LVDS serializer and deserializer chips themselves (only their
  parallel-side ports exist);
* the RS-422/PCM interfaces and their coding, which are not specified;
* the USB common-mode filter and ferrite bead;
* the power supply;
* the PC software that encodes frames, computes error rates and shows the
  images.

The flash chips and the FT245 are external parts. Simulation models of both
are in `tb/`.

## Simulation

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. To run one with plain
Verilator (5.x), from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/img_store_pkg.sv tb/tb_img_store_top.sv --top-module tb_img_store_top
./obj_dir/Vtb_img_store_top
```

| testbench | what it shows |
|---|---|
| `tb_img_store_top` | End to end at a small size (16-word pages, 4 pages/block, 16 blocks, 32-word FIFO). Covers the scan with one bad block, erase, a store pass that fills the flash, read-back compared byte for byte with a slow host, and a stopped store pass with its read-back. It counts each mechanism (group skip, FIFO-half-full wait, R/B# wait, USB reads/writes, TXE# stall, stop, end of flash, serializer read-out, feedback upload, feedback overflow) and fails if any never happened. Also checks read-out to the serializer port, and 40 feedback words sent on an unrelated clock, which must reach the host in order. |
| `tb_img_store_full` | Default sizes throughout. Covers the full 2048-group scan, erase of every valid group, one full rotation of eight 4096-word pages from USB, and byte-exact read-back. |
| `tb_img_store_frames` | Default sizes. Three 256x128 16-bit checkerboard frames, shifted frame to frame, are stored and read back. The error rate must be 0. |
| `tb_nand_ctrl` | Controller at a small size. Checks page order and contents in both chips, no plane reprogrammed while busy, and exactly 2*(PAGE_WORDS+7)+7 clocks per page. Also checks read-back under back-pressure and a stopped pass. |
| `tb_nand_ctrl_rate` | Controller at full page size, with models that program for 56000 clocks (700 us at 80 MHz). Checks that no R/B# wait and no plane conflict occur, and that the rate is 79.8 MB/s. |
| `tb_ft245_if`, `tb_byte_to_word`, `tb_word_to_byte`, `tb_data_fifo`, `tb_async_fifo`, `tb_bbt_ram` | Unit tests with random stalls, against reference models in the testbench. |

Each full-size testbench runs in a few seconds. The flash model stores pages
sparsely, so memory stays small. It uses short read, erase and R/B# times
(10, 20 and 3 clocks) to keep the full-size scan and erase fast. Only the
program time is realistic.

The RTL uses assertions for the bus rules: no data bus contention on the
FT245 side, RD# only with OE# low, never WE# and RE# low together, never CLE
and ALE together, no FIFO overflow or underflow, and an ascending
invalid-block list. Running with `--assert` checks them.
