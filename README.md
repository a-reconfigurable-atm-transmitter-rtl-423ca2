# Reconfigurable ATM transmitter/receiver for SONET STS-12

This is the ATM layer of a line card that joins a cell switch to a 622 Mb/s
SONET link. It sends and receives ATM cells in the payload of an STS-12 frame,
in one of two configurations chosen at start-up:

* **STS-12c**: one 622 Mb/s ATM stream fills the whole concatenated payload.
* **4×STS-3c**: four independent 155 Mb/s ATM streams, byte-interleaved into
  one STS-12.

The main idea is that both configurations use the same logic, on the same
32-bit word stream, at one word per clock. A 32-bit word at 19.44 MHz is
exactly the STS-12 line rate of 622.08 Mb/s. Seen from the word stream, the
two configurations differ in one way:

* In STS-12c a 53-byte cell slides across the four byte lanes. It moves one
  lane per cell, because 53 mod 4 = 1.
* In 4×STS-3c each byte lane belongs to one channel for good.

Each direction has two "chips", as in the original FPGA implementation:

| direction | chip 1 | chip 2 |
|-----------|--------|--------|
| transmit | cell handling: FIFO reads, idle cells, HEC, scrambling, formatting or interleaving | SONET frame timing, overhead addressing, per-channel scrambling |
| receive | cell delineation, HEC check, descrambling, idle-cell removal | word assembly and buffering, request/grant toward the cell memory |

## The word stream

Everything is counted in STS-12 words of 4 bytes.

* **Bit order.** Bit 31 is the first bit on the line, so byte lane 3
  (bits 31:24) is the first byte of a word and lane 0 (bits 7:0) the last.
* **Rows and frames.** A row is 270 words, and 9 rows make a 125 µs frame
  (2430 clocks). Each row has:
  * 9 transport overhead (TOH) words;
  * 1 path overhead (POH) word;
  * 260 payload words.
* **The POH word.** It differs between the modes:
  * STS-12c: the single path overhead byte sits in bits 7:0. Lanes 3..1 of
    that word carry cell bytes.
  * 4×STS-3c: the whole word is overhead, one POH byte per channel.
* **Channels.** In 4×STS-3c, channel *c* always occupies lane *c*.

The transmit side never produces overhead bytes itself. Chip 2 addresses an
external overhead SRAM with 16 buffers of overhead, and the SRAM's bytes
replace the word's bytes in the enabled lanes. On the receive side, an
external path termination chip marks the words:

* `rx_payload[3:0]` (Stream_Payload) marks words that carry payload.
* `rx_pathovh[3:0]` (Stream_PathOvh) announces that the **next** word holds
  path overhead.

Chip 1 removes those bytes before delineation.

## Transmit path

### Chip 1: cell sources, HEC and scrambling (`atm_tx_chip1`)

**Input cells.** Cells come from four transmit FIFOs, 13 words each: one
header word in standard ATM order, without HEC, then 12 payload words. The
FIFOs are first-word-fall-through, and a non-empty FIFO is assumed to hold a
whole cell.

**Choosing a cell.** At every cell boundary chip 1 picks a source:

* **STS-12c**: the next non-empty FIFO after the one used last (round-robin).
* **4×STS-3c**: FIFO *c* feeds channel *c*.

If there is no cell, or `gen_idle` is high, it sends an idle cell instead.
The idle header is `00 00 00 00` and the idle payload is `0x6A`. On receive,
any header matching `00000000 00000000 00000000 0000xxx0` is taken as idle.

**HEC and scrambling.**

* Every header word goes through the 32-bit parallel HEC circuit
  (`atm_hec32`).
* In STS-12c the 12 payload words are scrambled 32 bits at a time with the
  x^43+1 self-synchronous scrambler (`atm_scrambler`, W = 32). Headers and
  HEC are never scrambled.
* In 4×STS-3c, scrambling is done per channel in chip 2.

### STS-12c formatter: cells that slide through the lanes (`atm_tx_formatter12c`)

This is the least obvious part of the transmitter. Each 4-byte header word
must become 5 bytes (header plus HEC). In every row, one lane of the POH word
must be left free. So the byte boundary of the input words drifts against
the output words.

The original hardware used two sets of byte shift registers clocked at 4×
the word rate. This design uses a byte queue instead:

* The queue never holds more than 8 bytes.
* Each clock it gives out as many bytes as the slot needs: 4 for payload,
  3 for POH (lane 0 left zero), 0 for TOH.
* When fewer than 4 bytes are left, it pulls the next cell word in the same
  clock. A header word pushes 5 bytes into the queue.

The behaviour is the same as the shift registers; the structure is not.
Assertions check that the queue neither overflows nor runs dry.

### 4×STS-3c interleaver (`atm_tx_interleaver4x`)

All four channels run in cell lockstep. Within a cell, the byte positions
hold:

| positions | content |
|-----------|---------|
| 0..3 | the four channels' header bytes |
| 4 | the **HEC word**: each lane holds its own channel's HEC |
| 5..52 | payload |

**Ping-pong registers.** There are two sets of four channel registers:

* One set supplies the output. In the *b*-th slot of a 4-slot group, lane
  *c* gets byte *b* of channel *c*'s word.
* Meanwhile the other set loads the next group: channel *b*'s word in slot
  *b*.

So the four FIFOs are read strictly in turn, one word per clock. Nothing is
read in the HEC slot, which makes 52 reads per 53-byte cell.

**After reset.** The first four payload slots only fill the registers, and
go out as zero words.

### Chip 2: frame timing and overhead (`atm_tx_chip2`)

* **Slot counting.** Chip 2 counts rows and columns and tells chip 1 what the
  current slot is (TOH / POH / payload). Chip 1 answers with that slot's word
  one clock later.
* **Output and overhead SRAM.** Chip 2 registers the word and outputs it two
  clocks after the slot, together with:
  * `oh_addr = {buffer[3:0], row[3:0], column[3:0]}` (columns 0..8 TOH,
    9 POH);
  * `oh_oe`;
  * `oh_be`: all lanes for TOH; lane 0 for the STS-12c POH; all lanes for
    the 4×STS-3c POH;
  * `tx_sof`.
* **Overhead merge.** The top replaces the enabled lanes with `oh_rdata`.
  The SRAM read is taken as asynchronous.
* **4×STS-3c scrambling.** Each channel's payload bytes are scrambled by its
  own 8-bit x^43+1 scrambler.

## Receive path

### Cell delineation

A receiver finds cell boundaries by looking for a byte that is the correct
HEC of the four bytes before it. It uses three states:

* **HUNT**: every byte position is tried. A match moves to PRESYNC.
* **PRESYNC**: the HEC is checked once every 53 bytes.
  * DELTA = 6 consecutive matches give SYNC.
  * One mismatch returns to HUNT.
* **SYNC**: cells are passed on.
  * ALPHA = 7 consecutive mismatches return to HUNT.
  * A cell with a bad HEC is dropped, and so is an idle cell.

The original description gives ALPHA both as 7 and as 6. Seven is used here,
which is also the ITU-T value. DELTA and ALPHA are parameters.

Payload bytes of PRESYNC and SYNC cells pass through the x^43+1 descrambler.
Because it is self-synchronising, it is correct once 43 bits have gone
through.

**STS-12c (`atm_rx_delin12c`).**

* **Byte lanes.** After chip 1 removes the POH byte, a word carries 4, 3 or
  0 valid bytes, always a prefix in time.
* **Hunting.** Four 32-bit HEC circuits test all four byte positions of a
  word in the same clock. This replaces the original shift-register
  arrangement.
* **Payload.** Payload bytes are regrouped into words, descrambled 32 bits at
  a time, and sent out as 13-word cells: the header word (HEC removed) plus
  12 payload words.

**STS-3c (`atm_rx_chan3c`, four instances).**

* **Hunting.** One byte-serial HEC circuit (`atm_hec8`) with a clearable
  feedback register uses a six-byte window:
  * bytes 1–4 are folded into the HEC;
  * byte 5 is compared with it;
  * byte 6 clears the register.

  The window steps six bytes at a time. Since 6 and 53 have no common factor,
  every offset is tried within six cell periods.
* **Output.** Header bytes go out marked `hdr`. On the HEC byte slot,
  `commit` says whether the cell is kept; payload bytes follow only for kept
  cells.

**Receiver chip 1 (`atm_rx_chip1`).**

* **Overhead removal.** It turns Stream_Payload/Stream_PathOvh into byte-lane
  masks. In STS-12c this removes the POH byte; in 4×STS-3c, the POH word.
* **Mode selection.** `mode` selects which delineator drives the chip 2 bus
  (`rx_cell_bus_t`) and the status outputs.

### Chip 2: words for the cell memory (`atm_rx_chip2`)

**Buffering.**

* **STS-12c**: words go into an 8-entry FIFO.
* **4×STS-3c**: each channel first assembles words. Header bytes are held
  until `commit`; uncommitted headers are discarded. Payload bytes are packed
  four to a word. Each channel then has a 3-entry FIFO.

**Request/grant.**

* Every word written raises a one-clock pulse on one `rx_request` line:
  * 4×STS-3c: the channel's line;
  * STS-12c: the lines 0..3 in turn.
* Each request leaves two clocks after the word is complete, as in the
  original request pipeline (`REQ_PIPE = 2`).
* The buffer controller answers each request with one `rx_grant` pulse. The
  oldest word appears on `cell_data` with `cell_valid` three clocks after the
  clock edge that samples the grant, as in the original read pipeline
  (`DATA_PIPE = 3`).
* The controller must keep up; an assertion flags a full STS-12c buffer.

## HEC and scrambler arithmetic

**HEC.** The HEC is the CRC-8 of the header with generator x^8 + x^2 + x + 1,
plus the coset 0x55. Header bit 31 is the first bit.

* `atm_hec32` computes it in one step. Each HEC bit is an XOR of a fixed set
  of header bits; the sets are the parallel equations for this generator,
  stored as 32-bit term masks.
* `atm_hec8` does one CRC step per bit, eight steps per clock.

For example, the idle header `00000000` has HEC `0x52`.

**Scrambler.** It is self-synchronous, x^43+1: output bit = input bit XOR the
output bit 43 positions earlier. The descrambler is the same with the input
bit in the delay line. Both modules take any width W from 1 to 42 bits per
clock:

* per-bit output: `dout[W-1-k] = din[W-1-k] ^ state[42-k]`
* state update: `state <= {state[42-W:0], dout}` (descrambler: `din`)

Here `state[0]` is the newest bit. With `en` low, data passes unchanged and
the state holds.

## Top level (`atm_gateway_top`)

| group | ports |
|-------|-------|
| control | `clk` (word clock), `rst_n` (async, active low), `mode` (change only under reset), `gen_idle`, `scramble_en` |
| transmit FIFOs | `fifo_empty[3:0]`, `fifo_data[4]` (32 bit), `fifo_rd[3:0]` |
| overhead SRAM | `oh_buf_sel[3:0]`, `oh_addr[11:0]`, `oh_oe`, `oh_be[3:0]`, `oh_rdata[31:0]` |
| line out | `tx_data[31:0]`, `tx_sof`, `tx_toh`, `tx_poh`, `tx_hec`, pulses `tx_idle_cell`, `tx_data_cell` |
| line in | `rx_data[31:0]`, `rx_payload[3:0]`, `rx_pathovh[3:0]` |
| cell memory | `rx_request[3:0]`, `rx_grant[3:0]`, `cell_data[31:0]`, `cell_valid`, `cell_chan[1:0]` |
| status | `rx_state[4]` (HUNT/PRESYNC/SYNC per channel; STS-12c uses entry 0), `rx_hec_err[3:0]`, `rx_idle[3:0]` |

## Where this design departs from the original

* **One clock.** There is one clock, the 19.44 MHz word clock, with enables.
  The original used a byte clock at 4× the word rate, masked and shifted
  word clocks, and a separate switch-side clock.
* **Formatter.** The STS-12c formatter is a byte queue, not two barrel shift
  register sets.
* **STS-12c hunt.** It checks all four byte positions per clock.
* **Counters.** Binary counters replace the one-hot 53-state cell counter.
* **Where bytes are removed.** In 4×STS-3c, HEC bytes and path overhead are
  removed in receiver chip 1, not chip 2.
* **Interleaver start-up.** The 4×STS-3c interleaver sends zero words in the
  first four payload slots after reset.
* **Configuration.** `mode` is a static setting applied under reset.
* **ALPHA.** It is 7; the original text gives both 6 and 7.
* **Own choices where the original is silent:**
  * the request as a one-clock pulse per word (the pipeline depths follow
    the original, but everything runs on one clock rather than the
    switch-side clock);
  * the STS-12c request-line rotation;
  * the overhead SRAM address layout;
  * the idle payload byte `0x6A`;
  * FIFO fall-through behaviour.

## Not included

* **Header re-arrangement.** The switch-side header bit layout is not known,
  so headers pass in standard ATM order, and a re-arranging stage would sit
  at the FIFO side.
* **External parts.** These are outside this RTL:
  * the FIFOs and the overhead SRAM;
  * SONET framing, BIP and frame scrambling;
  * serializer and optics;
  * path termination;
  * the receive buffer controller and cell memory;
  * the line card processor.

  The testbenches model the FIFOs, the SRAM, the path termination
  qualifiers and the buffer controller.

## Throughput

* **STS-12c.** The design needs 622.08 Mb/s and delivers it: one 32-bit word
  per clock at 19.44 MHz, 2430 clocks per 125 µs frame, about 1.41 M cells/s.
* **4×STS-3c.** One byte per channel per clock, i.e. 155.52 Mb/s per channel.
* **Wider streams.** Throughput for wider datapaths (64 bits per clock and
  up, STS-48c and beyond) would need a wider datapath, which is not built.

## Verification

Each block has a self-checking testbench in `tb/`. Reference values come
from independent models in `tb/atm_tb_pkg.sv`: a bit-serial CRC for the HEC,
a bit-serial x^43+1 scrambler and descrambler, and a cell/line stream
generator. Every testbench prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_atm_hec32`, `tb_atm_hec8` | HEC of fixed and random headers against the serial CRC |
| `tb_atm_scrambler`, `tb_atm_descrambler` | against the serial model, at W = 32 and W = 8; round trip; hold while disabled |
| `tb_atm_tx_formatter12c` | byte stream over 4 rows: HEC after each header, POH lane free, 1043 cell bytes per row |
| `tb_atm_tx_interleaver4x` | per-lane channel byte streams, HEC word, scramble marks, read order |
| `tb_atm_tx_chip1` | both modes: cells parsed back, HEC and descrambled payload checked, idle cells, `gen_idle` |
| `tb_atm_tx_chip2` | slot sequence, two-clock latency, per-channel scrambling, overhead addresses and byte enables, `sof` |
| `tb_atm_rx_delin12c`, `tb_atm_rx_chan3c` | sync from a random offset; single error; ALPHA−1 errors (stay in SYNC); ALPHA errors (fall to HUNT); resync; idle removal; no required cell lost |
| `tb_atm_rx_chip1` | both modes through the Stream_Payload/Stream_PathOvh interface |
| `tb_atm_rx_chip2` | word order per channel, cell_chan, grant-to-data timing, STS-12c request rotation, dropped headers discarded |
| `tb_atm_gateway_top` | end to end at the default parameters (see below) |

### The end-to-end test

`tb_atm_gateway_top` runs the top with no parameter overrides:

* **Setup.**
  * A loopback wire returns `tx_data` one clock later as `rx_data`.
  * The testbench generates `rx_payload`/`rx_pathovh` as a path termination
    would.
  * Random cells arrive in the four FIFOs at about 60 % load.
  * A buffer controller model grants every request.
  * Now and then a header bit is flipped on the line.
* **Runs.** The test covers 3 frames in STS-12c, then a reset that switches
  the mode, then 4 frames in 4×STS-3c.
* **Checks.**
  * Every received cell is the next cell sent on its stream.
  * Losses are allowed only before the first delivered cell, and at most one
    per injected error.
  * Every overhead slot carries the SRAM word at its `{buffer, row, column}`.
  * Every frame is 2430 clocks long. It carries 177–178 HEC bytes in STS-12c
    (9 × 1043 cell bytes / 53) and 44–45 HEC words in 4×STS-3c
    (9 × 260 bytes per channel / 53).
* **Mechanism counts.** It counts each mechanism and fails if any count is
  zero: idle-cell insertion, HEC insertion, TOH and POH insertion,
  HUNT→PRESYNC and PRESYNC→SYNC, HEC errors, idle-cell removal, the mode
  switch, and request/grant.

Each testbench was also run against a copy of its module with one
deliberate fault, and every one reported failures.

### Running a testbench with Verilator

```
verilator --binary --timing --assert -Wno-fatal \
  -Irtl -Itb -y rtl +libext+.sv \
  rtl/atm_pkg.sv tb/atm_tb_pkg.sv tb/tb_atm_gateway_top.sv \
  --top-module tb_atm_gateway_top -o sim
./obj_dir/sim
```

Use any other `tb/tb_*.sv` file and its module name in the same way. Each
testbench runs in seconds.
