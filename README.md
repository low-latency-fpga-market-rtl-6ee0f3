# Hardware ITCH parser and order book

This core keeps a limit order book in FPGA fabric. It rebuilds the book
directly from a NASDAQ TotalView-ITCH 5.0 feed on a serial line.

No processor sits between the wire and the book. The chain runs as follows:

1. A UART turns the pin into bytes.
2. A framer cuts the byte stream into messages.
3. A parser decodes the messages.
4. A book engine applies each decoded message to two on-chip memories:
   - an order table keyed by order reference;
   - a per-penny price-level array.
5. A top-of-book tracker keeps the best bid and ask of four chosen symbols
   up to date.

A host processor only reads results and sets options through a small 32-bit
register file. A VGA output draws the depth of book and the counters live.

Everything runs on one 50 MHz clock. The core counts the clocks from a
message's first byte to the end of its book update, so it can report its own
latency.

## Top-level view

| Block | Job |
|---|---|
| `uart_rx` | 8N1 serial receiver. The bit time is set at run time. |
| `sync_fifo` (256) | Receive FIFO of bytes plus framing-error flags. |
| `frame_delimiter` | Finds `0x00`, a 16-bit big-endian length, then that many message bytes. |
| `itch_parser` | Decodes Add (`A`/`F`), Executed (`E`), Executed with price (`C`), Cancel (`X`), Delete (`D`) and Replace (`U`). |
| `sync_fifo` (64) | FIFO of decoded message records. |
| `book_engine` | Sequences each message through the table, the price array and the tracker. |
| `order_hash_table` | 16,384 slots of live orders, using linear probing and backward-shift deletion. |
| `price_level_array` | 8,192 × 64-bit entries: 4 symbols × 2,048 pennies. It is dual-ported. |
| `tob_tracker` | Best bid and ask, their quantities, and the depth of each side. |
| `stats_counters` | Message count, last latency, errors, messages per second. |
| `orderbook_csr` | Avalon-MM register file. |
| `text_buffer`, `vga_controller` | 640×480 display: depth bars on top, text and counters below. |
| `orderbook_top` | Connects the blocks above. |

The top level has these ports:

- the serial pin, plus a copy of it for a software decoder;
- an Avalon-MM slave with a 10-bit byte window;
- VGA RGB and sync outputs;
- the read port of an external character ROM.

## Serial front end and framing

`uart_rx` has four states: IDLE, START, DATA and STOP.

- **IDLE:** waits for a falling edge on the synchronised line.
- **START:** waits half a bit time and checks the line is still low. If it is
  high, the edge was a glitch and the receiver goes back to IDLE.
- **DATA:** samples eight bits, one bit time apart, so each sample lands in
  the middle of a bit.
- **STOP:** samples the stop bit. A high stop bit gives `valid`; a low one
  gives `frame_error`.

The bit time in clocks comes from `BAUD_SEL` in CONTROL:

| `BAUD_SEL` | Clocks per bit | Baud rate |
|---|---|---|
| 0 | 434 | 115,200 (the default) |
| 1 | 217 | |
| 2 | 109 | |
| 3 | 54 | |
| 4 | 50 | 1 Mbaud |
| 5 | 25 | |
| 6 | 17 | |
| 7 | 14 | |

Bytes pass through the 256-entry FIFO. A byte that arrives while the FIFO is
full is dropped and counted as an error.

The framer expects this layout on the line:

```
0x00 | LEN_HI | LEN_LO | LEN bytes of ITCH message
```

It marks the first and last byte of each message, and stamps the clock at
which the first byte arrived. A framing error inside a message aborts the
message and sends the framer back to hunting for `0x00`. So does a zero
length.

## ITCH decoding

The parser counts bytes within each message. It captures fields at their
ITCH 5.0 offsets:

- stock locate;
- one or two 64-bit order references;
- shares;
- the 8-byte stock name;
- the 4-decimal price;
- side.

`F` (Add with attribution, 40 bytes) is decoded exactly like `A` (36 bytes);
its attribution is ignored.

The parser checks every message against the length that its type requires. A
mismatch gives a parse error, and the message is dropped. Other message types
are skipped.

For an Add, the stock name is compared with the four `STOCK_FILTER` entries.
The number of the matching entry becomes the symbol id (0 to 3). An Add with
no match is passed on marked as unwanted, and the engine ignores it. A NUL in
a filter entry matches the space padding that ITCH uses, so short names can be
written NUL-padded.

A finished record carries:

- the message kind;
- the references;
- shares and price;
- side and symbol;
- the first-byte timestamp.

The record goes to the 64-entry message FIFO. The parser never stalls the
byte stream unless that FIFO is full.

## The order table (hash table with backward-shift deletion)

This is the part that decides whether the book stays correct over a long
replay.

Executes, cancels, deletes and replaces name only an order reference. To find
the order's price, side, symbol and remaining shares, the core keeps every
live order of the filtered symbols in a table.

**Slots.** Each slot is 128 bits:

| Field | Width |
|---|---|
| valid | 1 bit |
| reference | 64 bits, the full key, so probes compare real keys |
| price | 24 bits |
| remaining shares | 24 bits |
| side | 1 bit |
| symbol | 2 bits |

**Home slot.** A reference's home slot is `ref[13:0] ^ ref[27:14] ^
ref[41:28]`. The table is a single-port RAM with registered address and data,
so each probe takes three clocks.

**Lookup.** Reads from the home slot onward until the key matches or an empty
slot is found.

**Insert.** Writes the order into the first empty slot at or after the home
slot. If every slot is taken, it answers "full". The engine counts that as an
error and drops the Add.

**Delete.** Does not leave a tombstone. Tombstones would make probe runs grow
for the whole trading day. Instead, the freed slot is filled from further
along its run:

- Walk forward from the hole.
- For each occupied slot, compute its home slot `h`.
- If `h` is not cyclically in `(hole, slot]`, the entry may move. Copy it
  into the hole; its old slot becomes the new hole.
- Stop at the first empty slot.

After this, the table looks exactly as if the deleted order had never been
inserted. Every lookup still ends at the first empty slot, and the table holds
no tombstones.

**Bounds and diagnostics.** Every loop is bounded by the table size.

- `HT_LOAD` reports the number of occupied slots.
- `MAX_PROBE` reports the longest probe run seen since statistics were last
  cleared.

At 8,000 live orders the load is below one half, and runs stay short.

## Price levels and top of book

**Price-level array.** It has one 64-bit entry per symbol and penny:

- aggregate shares;
- number of live orders;
- a valid bit.

The address is `symbol << 11 | penny_offset`. Port A belongs to the book
engine, which does read-modify-write on it. Port B belongs to the tracker and
the display, and only reads. Both ports have a two-clock read latency.

**Penny window.** A price maps to `floor(price / 100) - base[symbol]`. The
base is set by the symbol's first accepted Add, so that the 2,048-penny window
(±$10.24) is centred on it. An Add outside the window is dropped and counted
as an error.

**Tracker.** The engine reports every price-array write to the tracker. For
the bid side:

- A level that becomes valid above the best bid becomes the new best.
- A change at the best level only refreshes its quantity.
- If the best level empties, the tracker scans downward through port B, one
  address per clock, until it finds the next valid entry. If it finds none,
  the side is empty.

The ask side mirrors this. A scan of k levels takes about k+3 clocks; a full
window takes about 2,050 clocks. Depth counters go up or down as levels turn
valid or empty.

**Display sharing.** The display copies 30 levels per frame during vertical
blanking. It uses port B only while the tracker is not scanning.

## Book engine: sequencing and latency

The engine takes one record at a time:

| Message | What the engine does |
|---|---|
| Add | Map price to penny, insert into the table, add to the price level. |
| Exec / Cancel | Look up; take off `min(shares, remaining)`. If nothing remains, delete the order (backward shift); otherwise write back the reduced shares. Adjust the level. |
| Delete | Look up, delete, take all shares and one order off the level. |
| Replace | Delete the old reference, then insert the new one with the new price and shares. Side and symbol are kept. |

Every level change is a read, two wait clocks, and a write on port A. Each
change is reported to the tracker.

The engine waits for the tracker to be idle before it touches the price
array, but hash-table work for the next message can proceed during a scan.

A message whose reference is not in the table is dropped silently. That
covers every order of an unfiltered stock.

When a message finishes, `latency = now - first_byte_time`. This includes the
time the message spent on the serial line (about 3.4 ms for an Add at
115,200 baud). A first Add spends about 13 clocks in the engine itself.

## Registers

All registers are 32 bits. The offsets are byte offsets.

| Offset | Name | Access | Content |
|---|---|---|---|
| 0x00 | CONTROL | R/W | [0] RUN, [3:2] ACTIVE_STOCK, [4] clear statistics (write-1 pulse), [7:5] BAUD_SEL. Reset: RUN = 1, 115,200 baud, stock 0. |
| 0x04 | STATUS | R | [2:0] parser state, [3] RX FIFO full, [4] RX FIFO empty, [8] sticky parse error |
| 0x08 | MSG_COUNT | R | Messages applied |
| 0x0C | LATENCY | R | Clocks, first byte to book update, of the last message |
| 0x10 / 0x14 | BEST_BID / BEST_ASK | R | Penny offset in the window; `0xFFFFFFFF` when that side is empty |
| 0x18 / 0x1C | BID_QTY / ASK_QTY | R | Shares at the best level |
| 0x20 / 0x24 | BID_DEPTH / ASK_DEPTH | R | Valid levels on each side |
| 0x28 | ERR_COUNT | R | Framing, length, window, table-full and FIFO-overflow errors |
| 0x2C | MSG_RATE | R | Messages in the last complete one-second window |
| 0x30–0x5F | STOCK_FILTER[0..3] | R/W | Two words per symbol; character 0 in bits [7:0] of the first word |
| 0x60 | HT_LOAD | R | Occupied table slots |
| 0x64 | MAX_PROBE | R | Longest probe run |
| 0x68 | CHAR_MEM_ADDR | R/W | Caption cell address |
| 0x6C | CHAR_MEM_DATA | W | Writes one caption character |

While RUN = 0, the engine takes no messages, and the FIFOs fill up.

## Display

The display runs standard 640×480 at 60 Hz:

- 800 × 525 total, with a pixel enable every second clock;
- 96-pixel hsync and 2-line vsync, both negative.

**Top half.** Fifteen rows of depth bars for the selected symbol:

- Bids are green and grow left from the centre.
- Asks are red and grow right.
- Bars are scaled by `QTY_SHIFT`.

**Bottom half.** An 80×60 grid of 8×8 text cells:

- The host writes a caption into the cells through `CHAR_MEM_*`.
- Eight fixed fields show counters in hexadecimal: message count, rate,
  latency, best bid, best ask, spread, bid quantity and errors.

The glyphs come from an external character ROM, with one registered read. A
cell shows every other row of a 16-row glyph.

## Building and simulating

All RTL is synthesizable SystemVerilog. `rtl/itch_pkg.sv` must be compiled
first. Each testbench in `tb/` prints a final line:

```
TB_RESULT checks=<n> failures=<m>
```

`failures=0` means pass.

To run the whole-core test with Verilator (5.x):

```
verilator --binary --timing -Irtl -Itb rtl/itch_pkg.sv tb/itch_tb_pkg.sv \
  rtl/uart_rx.sv rtl/sync_fifo.sv rtl/frame_delimiter.sv rtl/itch_parser.sv \
  rtl/order_hash_table.sv rtl/price_level_array.sv rtl/tob_tracker.sv \
  rtl/book_engine.sv rtl/stats_counters.sv rtl/orderbook_csr.sv \
  rtl/text_buffer.sv rtl/vga_controller.sv rtl/orderbook_top.sv \
  tb/tb_orderbook_top.sv --top-module tb_orderbook_top
./obj_dir/Vtb_orderbook_top
```

Block tests work the same way, with only the files that the block needs.

### What the tests check

Each block has a self-checking testbench driven by `$urandom`, and each has a
watchdog. The block tests work as follows:

| Test | What it does |
|---|---|
| `tb_uart_rx` | Random bytes at several bit times, with glitches and bad stop bits. |
| `tb_sync_fifo` | Random push/pop against a queue model, including full and overflow. |
| `tb_frame_delimiter` | Random lengths, framing errors mid-message, zero lengths. |
| `tb_itch_parser` | Random messages of every type, including `F`; wrong lengths; unknown types; filter hits and misses. |
| `tb_order_hash_table` | Random insert/lookup/delete against a model of the table. A 64-slot instance makes long probe runs and wrap-around common, which exercises backward shift; a full-size instance runs a short pass. |
| `tb_price_level_array` | Read latency and write/read ordering on both ports. |
| `tb_tob_tracker` | Brute-force best price, quantity and depth after every update, plus the exact timing of a 100-level scan. |
| `tb_book_engine` | The engine with real memories, against a reference book, after every message. |
| Remaining blocks | Cycle-exact or pixel-exact models of their outputs. |

`tb_orderbook_top` drives the serial pin of the whole core. It:

- programs the filters;
- sends several hundred random framed messages;
- compares every register with a software book;
- exercises errors, FIFO overflow with RUN = 0, the rate window and the
  display.

At the end it prints how often each mechanism was hit. `tb_orderbook_top` uses
a smaller table (1,024 slots) and a short rate window to keep run time down.
`tb_orderbook_full` runs the same checks on the default-size core, with no
parameter overrides.

## Differences from the original design, and open points

- **Window base.** Each symbol's window base comes from its first accepted Add,
  not from the median of the first 256 messages. Otherwise the early messages
  would have no window to land in.
- **Replace.** The two level updates of a Replace are done one after the other
  on port A. Port B is kept for the tracker's scans.
- **Message FIFO width.** The FIFO is as wide as the decoded record (two
  64-bit references and more), not 128 bits.
- **Bit time.** At 115,200 baud the bit time is 434 clocks (50 MHz / 115,200).
  The source gives both 417 and 434. The other `BAUD_SEL` codes are this
  design's own.
- **MSG_RATE.** It is a count over consecutive one-second windows, not a
  sliding ring buffer.
- **Defaults and formats.** CONTROL resets with RUN = 1. BEST_BID and BEST_ASK
  read all-ones when that side is empty. NUL in a filter matches a space.
- **Text cells.** Cells are 8×8. The caption buffer is 80×60 cells, and those
  only fit 480 lines with 8-line cells.
- **Not included.** The character ROM contents. The host software: the
  replay tool, the ARM reference decoder, the Linux driver, and the
  Platform Designer bridge that connects the register file to the processor.
- **Crossed books.** The tracker assumes an uncrossed book: bids below asks in
  each window. The price array stores no side.
