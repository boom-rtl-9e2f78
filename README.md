# BOOM: a buffered server DIMM built from mobile DRAM

Server memory spends much of its power in the DRAM chips' fast I/O and in
activating many chips for every access. Mobile DRAM (LPDDR2) is far more frugal
but runs at a fraction of the DDR3 data rate. BOOM ("Buffered Outputs On
Module") bridges the gap on the DIMM: a buffer chip keeps a normal fast 64-bit
DDR3 channel (DBUS, 1600 MT/s) towards the memory controller, and behind it
drives several slow internal data buses (iDBUS lanes) whose combined width
matches the DBUS bandwidth. Because a 128-byte block is then spread over the
chips of several lanes, the check symbols of those lanes can be pooled into one
Reed-Solomon code that corrects a whole failed chip (chipkill) and also tells a
chip failure from a failed DBUS pin.

This repository holds synthesizable SystemVerilog for one BOOM channel:

* the **buffer chip** (command split and translation, synchronization queues,
  read merge and write split), and
* the **memory controller's ECC path** (block encoder on the write side;
  decoder and failure classifier on the read side),

joined in `boom_top`, with self-checking testbenches for every module and a
behavioural model of the DRAM ranks for the system tests.

## Configuration

All defaults follow the low-power configuration BOOM-N4-L-400-S2:

| Parameter | Default | Meaning |
|---|---|---|
| `N_IDBUS` | 4 | internal data buses (lanes), each 72 bits (64 data + 8 check) |
| `SUBRANKS` | 2 | lanes are grouped into sub-ranks; a block is read from one sub-rank |
| `RATIO` | 4 | DBUS beat rate / iDBUS beat rate (1600 / 400 MT/s) |
| `RANKS` | 4 | logical ranks behind the buffer |

From these follow: lanes per sub-rank `L = N_IDBUS / SUBRANKS` = 2, and the
burst each lane delivers for one block `B = 16 / L` = 8. A block is 128 bytes of
data = 16 DBUS beats of 72 bits, check bits included.

Other configurations run from the same RTL by parameter: N2-D-800-S1
(`N_IDBUS=2 SUBRANKS=1 RATIO=2`) and N4-L-400-S1 (`N_IDBUS=4 SUBRANKS=1
RATIO=4`) are both exercised by the buffer testbench.

## Clocking

The whole design runs on one clock at the DBUS beat rate. The buffer derives two
strobes from a free-running divider:

* `idbus_ce`, one clock in every `RATIO`: an iDBUS beat;
* `iabus_slot`, one clock in every `2*RATIO`: an iABUS command slot (the
  internal command bus runs at half the internal data rate).

A real buffer chip would have separate clock domains and a DLL/PLL; here the
slow domains are clock enables so that the whole path is a single synchronous
design and simulates cycle-exactly.

## Buffer chip

```
 ABUS ──► boom_abus_split ──► boom_cmd_translate ×N ──► iABUS 0..N-1
                │ rd/wr issue + sub-rank
                ▼
 DBUS wr ─► boom_write_split ─(per-lane boom_sync_fifo)─► iDBUS lanes
 DBUS rd ◄─ boom_read_merge  ◄(per-lane boom_sync_fifo)── iDBUS lanes
```

**Command path.** `boom_abus_split` sends each external command to the iABUS
that owns its rank. Each bus owns a contiguous share of `RANKS / N_IDBUS`
ranks. Every iABUS has a small queue in `boom_cmd_translate`, which renumbers the
rank within the bus and rewrites the burst length from the external 16 to the
internal 16/L. It issues at most one command per iABUS slot. `abus_ready` drops
while the target queue is full; that is the buffer's stall. NOPs are dropped.
The split also reports each accepted read or write, with its sub-rank, to the
data path so that the data path knows which lanes a block comes from or goes to.

**Read merge** (`boom_read_merge`, the hardest part). Each lane has a 16-word
synchronization queue. An order queue holds the sub-rank of every accepted
read. The DBUS burst for the oldest read starts only when every lane of that
sub-rank holds enough words that the burst of 16 can run without a gap:

```
start_words(L, RATIO, B) = max over k = 0..B-1 of  (k + 1 - floor(k·L / RATIO))
```

The DBUS takes word k of a lane about k·L clocks after the start; by then the
lane has delivered floor(k·L / RATIO) more words, so it must already hold the
rest. This gives 5 words for the default (lanes at a quarter rate, two lanes: the
iDBUS needs 32 clocks for what the DBUS sends in 16) and 1 word when the lanes
together match the DBUS rate, in which case the data is cut through as soon as
it arrives. The words are interleaved per internal beat: lane 0 word 0, lane 1
word 0, lane 0 word 1, … The next block may follow the last beat of the
previous one with no idle clock. Latency from the first lane word to the first
DBUS beat is 4 clocks in pass-through configurations and 20 clocks in the
default. Blocks leave in the order their read commands were accepted, so the
controller must issue reads to the DRAM in the same order it expects the data
back; `underflow` flags a burst that had to break, which cannot happen while
the lanes deliver at their rated speed.

**Write split** (`boom_write_split`) is the mirror: DBUS beats of a write block
are dealt to the lanes of the block's sub-rank in the same interleave, queued,
and sent out with all lanes of the sub-rank in step on `idbus_ce`. A write
block must follow its write command; `orphan_beat` flags one that does not,
and an assertion stops simulation on it.

## 64-byte accesses

With two lanes per sub-rank, an LPDDR2 burst of 4 on each lane is 64 bytes, so
the default configuration can also serve 64-byte cache lines. A command with
`abus_cmd.half` set is such an access:

* the iABUS command carries burst 4 instead of 8;
* the read merge waits for its own start threshold (3 of the 4 words per lane)
  and sends 8 DBUS beats; the write split expects 8 beats;
* on the controller side the lower 64 bytes of `wr_blk` are sent as strips 0
  and 1 (`wr_blk_half`), and a read burst that ends on its 8th beat comes back
  as the lower half of `rd_blk` with `rd_blk_half` set.

A 64-byte block is two whole strips, so it keeps the same chip and pin
protection as a 128-byte one. 64-byte reads can follow each other 8 clocks
apart, which is the same 12.8 GB/s.

## Error correction

The controller encodes every block as four **strips**. A strip is 4 DBUS beats
(two internal beats of the two lanes of a sub-rank) and carries one RS(36,32)
codeword over GF(2^8): 32 data symbols D0–D31 and 4 check symbols E0–E3.

**Symbol layout.** An 8-bit symbol is made of 4 bits from each of two internal
beats of one chip's nibble. With DBUS beat `t = 2b + l` (internal beat `b`,
lane `l`) and DBUS pin `p`:

* chip slot `c = p / 8` (slot 8 is the lane's check chip), nibble `h = (p % 8) / 4`;
* data pins map to symbol `D(2·(8l + c) + h)`, check pins to `E(2l + h)`;
* the symbol bit is `4b + p % 4`.

Consequences used by the classifier:

* a failed x8 chip spoils exactly the symbol pair D2g, D2g+1 (or E2l, E2l+1);
* a failed DBUS pin spoils D(i) and D(i+16) of every strip, in bits k and k+4
  of each, because the same pin carries both lanes.

Codeword positions are E0..E3 = 0..3 and D0..D31 = 4..35. The field polynomial
is x^8+x^4+x^3+x^2+1 and the generator has roots α^0..α^3, so the code corrects
any two symbol errors per strip.

* `boom_rs_encoder` is a combinational LFSR division.
* `boom_rs_decoder` computes four syndromes, solves the error locator directly
  for one or two errors (Peterson's method for t=2), finds the positions by
  trying all 36, solves for the two error values and flags anything
  inconsistent as uncorrectable. The α-power table is a constant built by a
  function at elaboration.
* `boom_fail_classify` names the cause from the decoder result:
  none, single symbol, chip (the chip pair), pin (the D(i)/D(i+16) pair with
  both error values confined to the two bits of one pin, `8'h11 << k`), multi
  (two errors of no pattern) or uncorrectable. It reports the chip (0–15 data,
  16–17 check) or the DBUS pin (0–71).
* `boom_mc_ecc_tx` encodes a whole block in the cycle it is accepted and sends
  it as beats in the next 16 clocks.
* `boom_mc_ecc_rx` collects 16 beats, decodes the four strips in parallel and
  presents the corrected block with a per-strip and an overall class two clocks
  after the last beat (priority uncorrectable > pin > chip > multi > single >
  none). A burst of the wrong length raises `framing_error`.

## Erasure mode

After a chip failure has been reported, the controller can tell the read path
which chip is dead (`rd_erase_valid`, `rd_erase_chip`, same numbering as
`rd_fail_chip`). Each strip is then decoded by `boom_rs_erasure_decoder`
instead of the normal decoder. Because the two symbols of the dead chip are at
known positions, two check symbols are enough to rebuild them:

```
S_j = r(α^j),  X1 = α^p1,  X2 = α^p2       (p1, p2: the chip's two positions)
T_0 = S_2 + (X1+X2)·S_1 + X1·X2·S_0
T_1 = S_3 + (X1+X2)·S_2 + X1·X2·S_1
Y1  = (S_1 + X2·S_0) / (X1 + X2),   Y2 = S_0 + Y1
```

`T_0` and `T_1` cancel the erased symbols exactly. If either is non-zero
something else is wrong too: a second chip, a pin or a single symbol. The block
is then flagged uncorrectable rather than risking a wrong correction, so a
second chip failure is always detected. The normal decoder could miscorrect
four wrong symbols. A strip whose dead chip actually read wrong is classed as a
chip failure of the declared chip. The setting must stay steady while blocks
are being decoded.

## Files

| File | Content |
|---|---|
| `rtl/boom_pkg.sv` | command types (`ext_cmd_t`, `int_cmd_t`), widths, `start_words` |
| `rtl/boom_ecc_pkg.sv` | GF(2^8) arithmetic, code constants, symbol layout functions, `fail_e` |
| `rtl/boom_sync_fifo.sv` | synchronization queue |
| `rtl/boom_cmd_translate.sv` | per-iABUS command queue and translation |
| `rtl/boom_abus_split.sv` | ABUS to iABUS split |
| `rtl/boom_read_merge.sv`, `rtl/boom_write_split.sv` | data paths |
| `rtl/boom_buffer.sv` | the buffer chip |
| `rtl/boom_rs_encoder.sv`, `rtl/boom_rs_decoder.sv`, `rtl/boom_fail_classify.sv` | code |
| `rtl/boom_rs_erasure_decoder.sv` | decoding around a known dead chip |
| `rtl/boom_mc_ecc_tx.sv`, `rtl/boom_mc_ecc_rx.sv` | controller ECC paths |
| `rtl/boom_top.sv` | one channel |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/boom_tb_pkg.sv` | independent reference code (table-based GF, layout, block helpers) |
| `tb/boom_dram_model.sv` | behavioural DRAM ranks with chip and pin fault injection |
| `tb/*_h.sv` | parameterised harnesses shared by testbenches that run several configurations |

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops; a
watchdog ends a hung run as a failure. With Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module boom_top_tb \
    rtl/boom_pkg.sv rtl/boom_ecc_pkg.sv \
    $(ls rtl/*.sv | grep -v _pkg) tb/boom_tb_pkg.sv \
    $(ls tb/*.sv | grep -v -e _tb.sv -e tb_pkg) tb/boom_top_tb.sv
./obj_dir/Vboom_top_tb
```

Replace `boom_top_tb` by any other testbench name.

`boom_top_tb` runs the channel at the default parameters: it writes 32 blocks,
reads them back at full DBUS rate, then injects a failed data chip, a failed
check chip, a failed DBUS pin and three failed chips. It then floods one iABUS
to force the ABUS stall. Last, it writes and reads 64-byte blocks, one read
every 8 clocks, with and without a failed chip, and reads in erasure mode with
the declared chip dead and with further chips dead. It counts each mechanism
(stall, overlapping bursts, back-to-back full-rate blocks, chip, pin and
uncorrectable classifications, translated commands, 64-byte blocks, erasure
rebuilds and detections) and fails
if any never happened.

## Departures and limits

* **Check bits of the 25% configuration.** N4-L-400-S2 is listed with four
  x16 check chips per rank, one per lane: 16 check bits per lane beat. Only 8
  check bits per lane fit the 72-bit DBUS at burst 16, so each lane is modelled
  as 72 bits (12.5% overhead) and the additional check storage is not used.
* **x16 chips.** The symbol layout is the one for x8 chips. A whole x16 chip
  spans four symbols of a strip, more than the code corrects, so it is not
  covered. The testbench's chip failures are 8 bits wide.
* **Erasure mode** covers one remembered chip. Tolerating several failed
  chips, which needs a wider internal path and more check chips, is not built.
* **Read order.** Data leaves in the order reads were accepted on the ABUS; the
  controller's scheduler must not let a later read on one iABUS overtake an
  earlier one on another.
* **Command format.** The translation changes rank numbering and burst length
  only. No DDR3 or LPDDR2 pin-level command encoding is generated; field widths
  of the command struct are this design's choice.
* **Single bidirectional DBUS** is modelled as separate read and write
  directions.
* **64-byte accesses** are chosen per command. Whether a system uses them for
  all lines or mixes them with 128-byte blocks is up to the controller.
* **Outside the RTL:** DRAM chips, the buffer's clock generation and I/O
  circuits, and the controller's scheduler.
