# A 1 Gigabit Ethernet NIC with a software-visible physical layer

Ordinary network cards hide the physical layer: software only ever sees
frames, never the bits on the wire, the idle patterns between frames or the
exact time a code group left the card. This design moves the split between
hardware and software down into the physical layer of 1000BASE-X Gigabit
Ethernet. The hardware keeps only the parts that have to run at the line's
bit rate: the PMA (serializer and deserializer) and the PMD (the optical or
copper module). Everything from the PCS upwards — the 8B/10B code, idles,
framing, the MAC — is left to software, which talks to the hardware through
two rings of raw 10-bit code groups. Software therefore controls and observes
every code group on the wire.

At 1 Gb/s of data, 8B/10B coding puts 1.25 Gbaud on the line, so the rings
and the host link must carry 125 million 10-bit code groups per second each
way.

```
                host / kernel side                 |            line side
                                                   |
  characters -> [pcs_encoder] -> enc_out_* ~~DMA~~> txr_wr_* -> [TX ring] -> [pma_tx] -> tx_serial
                                                   |
  characters <- [pcs_decoder] <- dec_in_*  <~~DMA~~ rxr_rd_* <- [RX ring] <- [pma_rx] <- rx_serial
```

`~~DMA~~` marks where a DMA/PCIe engine moves code groups between host memory
and the rings. It is not part of this RTL; its four connections are ports of
the top module so that a real engine, or a testbench model of one, can be
attached.

## Files

| file | what it is |
|---|---|
| `rtl/sonic_pkg.sv` | types (`cg_t`, `pcs_char_t`), the 8B/10B code tables and the encode/decode functions |
| `rtl/pcs_encoder.sv` | 8B/10B encoder with running-disparity register |
| `rtl/pcs_decoder.sv` | 8B/10B decoder (reverse table lookup, no disparity tracking) |
| `rtl/ring_buffer.sv` | circular buffer used as TX ring and RX ring |
| `rtl/pma_tx.sv` | PMA transmitter: serializer with K28.5 filler on underflow |
| `rtl/pma_rx.sv` | PMA receiver: deserializer with comma alignment |
| `rtl/sonic1g_top.sv` | the datapath above, DMA connections as ports |
| `tb/tb_*.sv` | one self-checking testbench per module, the end-to-end test and a codec line-rate test |

## Code groups and bit order

Everything between the rings and the line is a 10-bit code group, type
`cg_t`. It is held as

```
cg[9:0] = {a, b, c, d, e, i, f, g, h, j}      cg[9] = a is sent first
```

so the 6-bit sub-block `abcdei` is `cg[9:4]` and the 4-bit sub-block `fghj`
is `cg[3:0]`. A character is `pcs_char_t = {k, d[7:0]}` with
`d = {H,G,F,E,D,C,B,A}` (A is the least significant bit) and `k = 1` for a
control character. This is the IEEE 802.3 Clause 36 naming and line order.

## The 8B/10B code (pcs_encoder, pcs_decoder)

The code maps each octet to one of two 10-bit code groups so that the line
stays DC balanced, has enough transitions for clock recovery, and never
carries more than five equal bits in a row. It is built from two smaller
codes:

* **5B/6B** — `EDCBA` (32 values) to `abcdei`;
* **3B/4B** — `HGF` (8 values) to `fghj`.

Each sub-block code has either three ones in six (two in four), and then a
single form, or is unbalanced by ±2, and then has two forms that are bitwise
complements. The **running disparity** (RD) — whether more ones or more
zeros have been sent so far — chooses the form: at RD− the form with more
ones is sent, at RD+ the one with fewer. After an unbalanced sub-block RD
flips; after a balanced one it stays. RD is updated between the two
sub-blocks, so the 4-bit choice depends on the 6-bit result.

The package stores only the RD− column of each table (32 six-bit entries and
8 four-bit entries); the RD+ column is its complement wherever an alternate
exists, including the two balanced codes `111000`/`000111` (D.07) and
`1100`/`0011` (D.x.3) that are alternated to avoid long runs. Ones are
counted with `$countones`. Three exceptions are written out in `encode()`:

* **D.x.A7.** For y = 7 the normal code `1110`/`0001` would create a run of
  six after some 6-bit codes; the alternate `0111`/`1000` is used instead
  when RD− and x ∈ {17, 18, 20}, or RD+ and x ∈ {11, 13, 14}.
* **Control characters.** Only twelve exist: K28.0–K28.7, K23.7, K27.7,
  K29.7 and K30.7. K28 has its own 6-bit code `001111`/`110000`; the K.x.7
  characters always use A7; and after K28 the balanced 4-bit codes take
  the opposite polarity to data, which is what makes K28.1, K28.5 and K28.7
  carry the **comma** `0011111`/`1100000`. A request for any other control
  character raises `out_kerr`.
* **Start value.** RD is negative after reset (`INIT_RD = 0`); `INIT_RD = 1`
  starts positive.

The decoder does the reverse lookup in the same tables and accepts either
polarity. It does **not** track running disparity, so a code group of the
wrong polarity for the current disparity decodes without error;
`out_err` flags only a code group whose 6-bit or 4-bit half is in no table
(for example `111100`, or a half with too many ones). K28 is recognised by
its 6-bit code, K.x.7 by x ∈ {23, 27, 29, 30} followed by an A7 code.

Both blocks take one character per clock with a latency of one clock and no
back-pressure.

The design intends the PCS, and so this codec, to run in host software. The
RTL codec has the same tables and behaviour; in the top module it sits on
the host side of the DMA ports, where it serves as the reference for what
software must produce and as a hardware alternative.

## Rings (ring_buffer)

A ring is `DEPTH` entries of `WIDTH` bits (defaults 1024 × 10: one code
group per entry) with a wrapping write pointer, a wrapping read pointer and
an occupancy counter. The read side is first-word-fall-through (`rd_data`
is the oldest entry while `rd_valid` is high; `rd_ready` pops it). A write
when full is refused (`wr_ready` low) and reported by a one-clock `overflow`
pulse the clock after; a pop in the same clock makes room, so a full ring
can be written and read in the same clock. A written entry can be read the
clock after.

* **TX ring:** the DMA writes and waits on `txr_wr_ready`; `pma_tx` pops.
* **RX ring:** `pma_rx` writes and cannot wait — a code group that arrives
  while the ring is full is lost, and `rxr_overflow` shows it.

## PMA transmitter (pma_tx)

A 10-bit shift register sends one bit per clock, bit a first, so `clk` is
the 1.25 GHz bit clock and a code group leaves every ten clocks. On the
tenth clock it loads the head of the TX ring (popping it with the one-clock
`in_ready` strobe) if `enable` is high and the ring is not empty. Otherwise
it loads K28.5, alternating between its two forms `0011111010` and
`1100000101` so the filler is DC balanced and gives the far end commas to
align on; a filler sent while `enable` is high raises `underflow` for a
clock. After reset the first code group on the line is K28.5 (RD−).

The filler is inserted without regard to the running disparity of the
stream that software encodes, so a software PCS should keep the TX ring
from running empty in the middle of a frame.

## PMA receiver (pma_rx)

Bits arrive one per clock on `rx_serial`, already sampled on the clock
recovered from the line (clock recovery is the analog part of a transceiver
and is not modelled). The last ten bits form a window whose oldest bit would
be bit a. The receiver has to find where code groups start:

* When the seven oldest bits of the window are a comma, the window is a
  complete code group: it is delivered and the word boundary is set there
  (`realign` pulses if this is the first comma or a different boundary).
* Otherwise, once `aligned`, a code group is delivered every ten clocks.
* Before the first comma nothing is delivered.

A code group is delivered (`out_valid`, one clock) in the clock after its
bit j arrived. A comma on a new boundary is believed at once; there is no
voting over several commas. The comma cannot appear across the boundary of
two valid code groups, with one exception known from 8B/10B: K28.7 followed
by some characters. Software should not send K28.7 in a way that produces
that sequence.

## Top module (sonic1g_top)

`sonic1g_top` wires encoder, TX ring, `pma_tx`, `pma_rx`, RX ring and
decoder as in the diagram. Parameters: `TX_RING_DEPTH` and `RX_RING_DEPTH`
(1024) and `ENC_INIT_RD` (0). One clock drives everything. Between the codec
and the rings the top exposes:

* `enc_out_valid/enc_out_cg/enc_out_kerr` — encoder output, to the DMA;
* `txr_wr_valid/txr_wr_data/txr_wr_ready/txr_count` — TX ring write side;
* `rxr_rd_valid/rxr_rd_data/rxr_rd_ready/rxr_count/rxr_overflow` — RX ring
  read side;
* `dec_in_valid/dec_in_cg` — decoder input, from the DMA.

Line side: `tx_serial`, `rx_serial` and the status `tx_enable`,
`tx_underflow`, `rx_aligned`, `rx_realign`.

## Rates

| path | rate at clock f | at f = 1.25 GHz |
|---|---|---|
| line, each way | f/10 code groups/s | 125 M code groups/s = 1 Gb/s of data |
| encoder, decoder | f characters/s | 1.25 G/s, ten times line rate |
| ring host ports | f code groups/s | ten times line rate |

A single 1 Gb test stream (2^27 octets) needs at least 134.2 M octets/s
through the encoder to finish within a second, and 107.4 M code groups/s
through the decoder; one character per clock gives that at any clock above
134.2 MHz. Whether the logic reaches 1.25 GHz depends on the target; a
practical FPGA version would keep the rings and codec at 125 MHz and use the
transceiver's hard serializer in place of `pma_tx`/`pma_rx`, which would
then need a 10-bit parallel interface and a clock-domain crossing at the
rings.

## Outside the RTL

* **DMA/PCIe engine** — ports only.
* **Clock and data recovery, SFP+ module** — analog; the line appears as
  one bit per clock.
* **The rest of the PCS** (ordered sets, synchronisation, auto-negotiation)
  — left to software by the design, and not specified further.

## Choices made in this RTL

These points are this implementation's own, where the design leaves them
open: one clock domain; asynchronous active-low reset; ring depth 1024 and
one code group per ring entry; refusal plus overflow pulse on a full ring;
K28.5 filler of alternating polarity on underflow; comma alignment with
immediate realignment; `out_kerr` and `out_err` flags; registered codec
outputs with one clock of latency. The 8B/10B tables and rules are those of
IEEE 802.3 Clause 36.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/sonic_pkg.sv \
    tb/tb_sonic1g_top.sv --top-module tb_sonic1g_top -Mdir obj_top
obj_top/Vtb_sonic1g_top
```

Replace `tb_sonic1g_top` with any other testbench name:

| testbench | what it checks |
|---|---|
| `tb_pcs_encoder` | all octets and control characters at both disparities against written-out code groups, the disparity and run-length rules, uniqueness, latency |
| `tb_pcs_decoder` | written-out code groups of both columns, round trip through the encoder, error flag on all 1024 patterns |
| `tb_ring_buffer` | random traffic against a queue model at the default 1024 depth: empty, full, refused writes, read+write when full |
| `tb_pma_tx` | the exact bits on the line, pop timing, filler polarity, underflow |
| `tb_pma_rx` | misaligned start, alignment, delivery timing, bit slip and realignment |
| `tb_sonic1g_top` | end to end at default sizes with a DMA model and fibre loopback: frames through full rings, RX overflow, bit slip, and a count of every mechanism |
| `tb_codec_rate` | 2^27 characters (1 Gb) through encoder and decoder back to back: exact round trip and one character per clock |

`tb_codec_rate` runs for about a minute; the others take well under a
second.
