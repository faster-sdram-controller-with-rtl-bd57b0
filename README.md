# AHB SDRAM controller with ping-pong write buffers and burst read buffers

SDRAM is slow to answer a single access: a row has to be opened (ACTIVE),
the column read after the CAS latency, and banks periodically closed for
refresh. A processor on an AMBA AHB bus that waits for every access sees all
of that latency. This controller puts a few words of on-chip storage between
the bus and the SDRAM so that most accesses finish without waiting:

* **Writes** go into one of two small write buffers and complete as soon as
  the buffer takes them. While the bus fills one buffer, the other is written
  out to SDRAM (ping-pong), so bus writes and SDRAM writes overlap.
* **Reads** that miss fetch a whole SDRAM burst (4 words) into one of two read
  buffers. The word asked for is returned first; the next sequential reads
  hit the buffer and finish in the first data-phase clock, with no wait state.
* **Before any read goes to SDRAM**, every location of all four buffers is
  compared with the address in one clock (a parallel search), so recently
  read or written data is served from the buffers.
* **Rows are kept open** after an access. A following access to the same row
  needs only READ or WRITE; ACTIVE and PRECHARGE are issued only on a row
  conflict or for refresh.

In simulation with the default timings, a buffer hit completes in 1 clock and
a read miss to an idle or already-open bank in about 9 clocks (about 12 with
a 16-bit SDRAM). That is roughly a 90 % lower read latency for accesses the
buffers can serve. Sequential reads also cost fewer SDRAM commands: one READ
per 4 bus reads. Writes are not merged, so every bus write still becomes one
WRITE command (two with a 16-bit SDRAM).

## Block diagram

```
            +--------------+   write    +--------------------+   entries   +---------------+
 AHB  <---> | ahb_slave_if | ---------> | write_fifo x2      | ----------> | cmd_generator |
 slave      |  (address /  |            |  + wfifo_pingpong  |             |  open rows    |
            |  data phase) |            +--------------------+             +-------+-------+
            +------+-------+                     | entries                         | next command
                   | request                     v                                 v
            +------+-------+  search   +--------------------+   read miss  +---------------+   SDRAM
            | access_ctrl  | <-------> | read_update_logic  |   --------> | cmd_scheduler | <-------> pins
            +------+-------+           +--------------------+             | init, refresh,|
                   | fill                        ^                        | timing, data  |
                   v                             |                        +-------+-------+
            +--------------+                     |                                | read beats
            | read_fifo x2 | --------------------+ <------------------------------+
            +--------------+
```

`sdram_ctrl_top` wires these together. `sdram_ctrl_pkg` holds the SDRAM
command encoding, the AHB codes and the default geometry.

## Address map and SDRAM interface

The default device is a 128 Mbit single-data-rate SDRAM organised as
4 banks x 4096 rows x 256 columns x 32 bits (16 MB). The byte address is split
as

| HADDR bits | 23:12 | 11:10 | 9:2    | 1:0  |
|------------|-------|-------|--------|------|
| field      | row   | bank  | column | byte |

Bits above 23 are ignored (the AHB decoder selects the slave with `HSELx`).
The widths are parameters (`ROW_W`, `BANK_W`, `COL_W`; `ROW_W` must be at
least 11 because A10 selects "all banks" on PRECHARGE).

The SDRAM data bus is 32 bits by default. With `SD_DW = 16` the controller
drives a x16 part: each 32-bit bus word takes two SDRAM columns (low half at
the even column), so set `COL_W` one larger (9 for a 256-column x32 layout
becomes 512 columns x16). A buffered write then becomes two WRITE commands,
and a 4-word read is an 8-beat SDRAM burst whose beats are packed back into
words. The AHB side stays 32 bits.

The SDRAM pins are registered: `sd_cke`, `sd_cs_n`, `sd_ras_n`, `sd_cas_n`,
`sd_we_n`, `sd_ba`, `sd_addr`, `sd_dqm`, and the data bus split into
`sd_dq_o`, `sd_dq_oe` and `sd_dq_i` for a tristate pad outside. The SDRAM runs
on `HCLK`. The mode register is loaded with burst length 4 (8 for x16),
sequential order, CAS latency 2 and **single-location writes**: every buffered
write is one WRITE command per SDRAM column with its byte mask on DQM, while
reads are 4-word bursts.

## The AHB side

`ahb_slave_if` registers the address phase (when `HSELx`, `HTRANS` is NONSEQ
or SEQ, and `HREADY` are high) and presents the data phase to the core. If the
core can finish in that clock — a buffer hit, or a write a buffer accepts —
`HREADYOUT` stays high and the transfer has no wait state. Otherwise
`HREADYOUT` is held low and the master keeps its next address and control
signals on the bus. `HRESP` is always OKAY. Byte, half-word and word
transfers are supported (little-endian lanes). `HBURST` is not used: each beat
of a burst is handled as its own transfer.

## Write buffers and ping-pong

Each `write_fifo` holds up to 4 entries. Each entry is an address/data pair
with a byte strobe and a *pending* flag. The flag is set when the word is
stored and cleared once it has been written to SDRAM. Its fill side is a
four-state machine:

* **IDLE** accepts a word.
* **STORE** writes the word into the array.
* **INCREMENT** advances the write pointer.
* **FULL** is entered once 4 words are held.

So each word takes three clocks to store. A write that arrives while the buffer
is in STORE or INCREMENT waits (two wait states in a back-to-back burst).

`wfifo_pingpong` decides which buffer does what:

1. AHB writes go to the *fill* buffer.
2. The fill buffer is *closed* in three cases: when it is full; when a read
   miss needs SDRAM to be current (`drain_req`); or when the bus pauses
   writing while the other buffer has nothing left to move (a flush).
3. A closed buffer is *moved*: its entries go to SDRAM in order, one per
   WRITE command. When the last one has gone, the buffer empties itself and
   opens for writes again.
4. Once the fill buffer is closed, filling switches to the other buffer as
   soon as that one is empty. If neither can take data, the bus is held.

Buffers are moved in the order they were closed, so SDRAM sees the writes
in bus order.

## Read buffers and the search

Each `read_fifo` holds one 4-word burst, aligned on a 4-word boundary. It
has a tag (the burst address) and a valid vector with one bit per word. A
read hits when its address falls in the tag's range and its valid bit is set.
On a miss, `access_ctrl` requests a READ at the word's own column. The SDRAM
returns that word first and wraps inside the aligned block. The word goes to
the bus and into a read buffer in the same clock. The other three words
finish the fill. Fills alternate between the two read buffers.

`read_update_logic` compares the read address with all 8 read-buffer words
and all 8 write-buffer entries at once:

* A read-buffer hit wins. Its copy is always current, because every AHB write
  also updates a read-buffer copy of the same word, byte by byte.
* Otherwise, the newest **pending** write-buffer entry for the word is used.
  "Newest" means the highest index in the fill buffer, then in the other
  buffer. If that entry wrote all four bytes, its data is returned directly.
* A pending byte or half-word write cannot be returned on its own. The read
  then goes to SDRAM like a miss.

### Consistency rules

These rules are what keep the buffers and SDRAM consistent. They are the
part to keep in mind when changing the design.

* A read miss is sent to SDRAM only after both write buffers are empty.
  Until then `drain_req` closes the fill buffer. The fetched burst therefore
  never misses a buffered write.
* A read is not searched while a write buffer is in STORE or INCREMENT. The
  search therefore sees every write already accepted.
* No new request is taken until a burst fill has finished.

## Command generation and scheduling

`cmd_generator` keeps an open-row table (`opened_row`, one entry per bank).
For the request at its input it returns:

* READ or WRITE if the bank already has that row open;
* PRECHARGE if the bank has a different row open;
* ACTIVE if the bank is idle.

It updates the table from the commands that are actually issued.

`cmd_scheduler` owns the pins:

* **Power-up:** `INIT_WAIT` clocks of NOP with CKE high, then PRECHARGE ALL,
  two AUTO REFRESH and LOAD MODE. After that `init_done` goes high. Transfers
  issued earlier simply wait.
* **Refresh:** every `REF_INTERVAL` clocks. Open banks are closed first with
  PRECHARGE ALL, because AUTO REFRESH needs every bank idle.
* **Timing:** at most one command per clock, kept legal by counters for
  tRP, tRCD, tRFC, tMRD, tRAS (ACTIVE to PRECHARGE) and tWR (WRITE to
  PRECHARGE). A READ holds the command bus until its burst has arrived.
* **Read data** is registered at the pins. Word *i* reaches the core
  CL+2+*i* clocks after the clock edge that issued the READ (CL+3+2*i* with a
  16-bit SDRAM, once both halves are in).

Banks are not interleaved: one request is served at a time.

## Parameters (sdram_ctrl_top)

| parameter | default | meaning |
|-----------|---------|---------|
| `HAW` | 32 | AHB address width |
| `DW` | 32 | AHB data width (32 only) |
| `SD_DW` | 32 | SDRAM data width, 32 or 16 |
| `ROW_W`, `BANK_W`, `COL_W` | 12, 2, 8 | SDRAM geometry |
| `BURST` | 4 | read burst length = depth of every buffer (power of two) |
| `CL` | 2 | CAS latency (2 or 3) |
| `T_RP`, `T_RCD`, `T_RFC`, `T_RAS`, `T_WR`, `T_MRD` | 3, 3, 8, 5, 2, 2 | SDRAM timings in clocks |
| `INIT_WAIT` | 11400 | power-up wait in clocks (100 us at 114 MHz) |
| `REF_INTERVAL` | 1700 | clocks between refreshes (< 15.6 us at 114 MHz) |

The timings are chosen for a typical part at about 114 MHz. Set them from
your SDRAM's data sheet and clock.

## How far to trust it, and where it departs from the description

What is taken from the controller's description:

* the block structure (AHB slave interface, command generator and scheduler,
  two read and two write buffers);
* the burst-sized buffers with address/data pairs;
* the valid-vector hit check, and filling the read buffers in turn;
* the ping-pong rules and the hold when neither write buffer is free;
* the IDLE/STORE/INCREMENT/FULL states of a buffer;
* the one-clock parallel search with an executed flag;
* rows left open, and PRECHARGE ALL before refresh;
* CAS latency 2, the byte/half-word/word accesses and the 16- or 32-bit
  SDRAM data path.

What this design adds or chooses on its own:

* the single-data-rate interface (no DQS, no double data rate);
* the geometry and all timing values;
* single-location writes;
* draining the write buffers before a read miss, and updating the
  read-buffer copy on a write;
* returning the requested word first;
* flushing a part-filled write buffer when the bus pauses;
* forwarding only full-word writes from a write buffer;
* HRESP always OKAY, and HBURST not used.

What it does not have:

* bank interleaving;
* the baseline controller without buffers, which was used only as a
  reference for comparison.

Verification is by simulation only. Each block has a self-checking testbench,
and the whole controller is run against a behavioural SDRAM model that checks
command legality and timing. Nothing has been tried on an FPGA or a real SDRAM.

## Files and simulation

* `rtl/`: synthesizable SystemVerilog, one module or package per file.
  `sdram_ctrl_top.sv` is the top.
* `tb/`: testbenches. Each prints `TB_RESULT checks=N failures=M`.
  * `tb_<module>.sv` tests one block.
  * `tb_sdram_ctrl_top.sv` is the end-to-end test, with a short power-up and
    refresh interval. It counts every mechanism listed above.
  * `tb_sdram_ctrl_top_full.sv` runs the controller at its default parameters.
  * `tb_sdram_ctrl_top_x16.sv` repeats the end-to-end test with a 16-bit
    SDRAM.
  * `sdram_model.sv` and `ahb_master_bfm.sv` are simulation-only models.

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_sdram_ctrl_top rtl/sdram_ctrl_pkg.sv tb/tb_sdram_ctrl_top.sv
./obj_dir/Vtb_sdram_ctrl_top
```

Replace the top module name to run any other testbench.
