# Cryogenic SiPM readout chip: digital RTL

This is the digital part of a 32-channel readout chip for silicon photomultipliers (SiPMs) that run at
liquid-argon or liquid-xenon temperature. The design follows the published description of the
ALCOR prototype. Every SiPM pulse that crosses a discriminator threshold becomes one 32-bit word. The
word holds the channel number, which time-to-digital converter (TDC) measured the pulse, and a
timestamp with 50 ps bins. Words leave the chip on four serial links at 640 Mbit/s each. Everything
is configured over SPI.

The analog part of every channel is outside this RTL: the input stage, the two shaping amplifiers and
the two discriminators. The LVDS output drivers are outside it too. Their signals are ports of the top
module. The TDCs are mixed-signal circuits whose insides are not published, so they appear here as
behavioural models. The whole design therefore simulates, but only the digital blocks around the TDCs
synthesize.

## Timestamp: coarse counter plus TDC

Each channel has a free-running 15-bit counter of the system clock (`coarse_counter`). At 320 MHz it
wraps every 102.4 µs. A hit starts a TDC. The TDC measures the time from the trigger edge to the next
rising clock edge, in 50 ps bins, as a 9-bit code. On that clock edge the TDC pulses `hit_flag`. The
controller then stores the counter value, which is the count of that same edge. So, in clock periods
`Tclk`:

    t_hit = coarse * Tclk - fine * 50 ps        (coarse modulo 2^15)

Every counter is reset by `rst_n`. `coarse_clear` restarts all of them on the same edge.

A TDC is busy for 150 ns after a hit. That is 48 cycles at 320 MHz (`DEAD_CYCLES`). To scale to
another clock, set `DEAD_CYCLES = 150 ns / Tclk`. The chip is specified for clocks from 40 to 320 MHz.
The 9-bit fine code spans 512 x 50 ps = 25.6 ns, which covers one period of the slowest clock (25 ns).

## The channel: four TDCs, two modes

Each channel receives two asynchronous triggers, `trg[0]` (Trg1, the high-gain branch) and `trg[1]`
(Trg2, the low-gain branch). One configuration bit, `trg_sel`, picks the trigger that the TDCs
measure. `tdc_ctrl` routes it to the four TDCs and decides which TDC may start. A TDC moves through
four states:

    FREE --arm--> ARMED --hit_flag--> CONV (coarse stored) --done--> PEND (result held) --res_ack--> FREE

Only an armed TDC starts on an edge. The two modes differ in which TDCs are armed:

* **Single photon counting (SPC).** Exactly one free, enabled TDC is armed at a time. TDCs are taken
  round-robin. Once the armed TDC reports its hit, the next free TDC is armed two clock edges later.
  Up to four hits can then convert together. That gives 4 / 150 ns = 26.7 Mhit/s peak per channel,
  well above the 5 MHz target rate. A hit that arrives while no TDC is armed is lost. This happens
  when all four are converting or hold results, and within about two cycles after the previous hit.
* **Time over threshold (ToT).** TDC0 and TDC1 measure rising edges of the trigger. TDC2 and TDC3
  measure trailing edges, because they receive the inverted trigger. TDCs are armed in pairs, (0,2)
  or (1,3). A new pair is armed only when no TDC is waiting for an edge. So each trailing-edge word
  belongs to the rising-edge word before it, and the pulse width is the difference of the two
  timestamps. Two pulses can be in conversion at once. After a trailing edge, the next pair is armed
  three clock edges later. A pulse that starts sooner is missed.

Clearing `ch_en` disarms waiting TDCs and restarts the round-robin at TDC0 (at pair (0,2) in ToT
mode). The mode and the TDC enable mask should only be changed while the channel is disabled.

**Back-pressure.** A TDC that holds a result stays out of use until the payload generator has taken
the result. So when the FIFO is full, TDCs fill up, and then new hits are lost. Hits are lost at the
channel input; words already in the chain are never dropped.

## Payload word

| bits  | field   | meaning                                  |
|-------|---------|------------------------------------------|
| 31    | rsvd    | always 0                                 |
| 30:26 | ch_id   | channel 0..31 (column * 8 + row)         |
| 25:24 | tdc_id  | TDC 0..3; in ToT mode 0/1 = rising edge, 2/3 = trailing edge |
| 23:9  | coarse  | coarse counter, see above                |
| 8:0   | fine    | TDC code, 50 ps bins                     |

The published description gives the field contents and the widths of coarse, fine and the whole word.
The order of the fields and the reserved bit are choices of this design.

## Readout path

**Inside a column.** The 32 channels form 4 columns of 8. Row 0 of each column is next to the
End-of-Column. In `data_control`, the payload generator takes one finished result per cycle, the
lowest-numbered TDC first, and writes it to a 32-bit x 4 FIFO. A multiplexer then merges the FIFO
with the words coming from the channel above, into one output register towards the channel below.
When both sources have a word, they take turns. So no channel in the chain can be starved by the
channels above it, and none can starve them. All links inside a column use valid/ready handshakes;
`up_ready` depends combinationally on `dn_ready` down the whole column. Words of one channel can
leave out of time order when several TDCs finish close together. Sort by timestamp if order matters.

**Column to End-of-Column.** The bottom channel's word is handed over by a four-phase handshake with
bundled data (`hs_tx` to `eoc`):

1. The sender holds the word and raises `req`.
2. The End-of-Column takes the word and raises `ack`.
3. The sender lowers `req`.
4. The End-of-Column lowers `ack`.

Each side brings the other side's signal in through `sync_dual_edge`, so the handshake keeps working
when the two ends see different clock phases.

**The synchroniser** (`sync_dual_edge`) is the one circuit here whose gate-level structure is
published. Two flip-flops sample the input, one on the rising and one on the falling clock edge. Their
outputs are ORed and then pass two rising-edge flip-flops. Whichever sample sees a rising input first
lets it through:

* input just before a falling edge: output after 1.5 periods;
* input just after a falling edge: output after 2.5 periods;
* in general: 1.5 periods plus the time to the next falling edge, or 2 periods plus the time to the
  next rising edge, whichever edge comes first.

A falling input needs both samples, so it takes 1.5 periods plus the time to the next falling edge,
or 2 periods plus the time to the next rising edge, whichever edge comes later. With only one clock
domain the handshake costs about 12 cycles per word. That is well under the 17 cycles a link needs
per word.

**Links.** In the End-of-Column, each column has a one-word buffer and its own serial link
(`lvds_ser`). A link sends two bits per clock period: the first while the clock is high, the second
while it is low. That is 640 Mbit/s at 320 MHz. A frame is 17 periods long:

* a start symbol: a 1 bit, then a 0 bit;
* then the 32 bits of the word, most significant first.

The line idles at 0, so a receiver finds a frame at the first 1 after idle. Frames may follow back to
back. `tx = clk ? bit_a : bit_b` stands for the DDR output cell that feeds the LVDS driver. The
framing is this design's choice.

## Configuration

The channel configuration words form one shift chain per column. The chain starts in row 0 and ends
in row 7. The end of the chain returns to the End-of-Column for read-back. Each channel keeps a shadow
word that shifts, and an active word that is loaded on an update strobe, so shifting never disturbs a
running channel. Reset clears both, which disables every channel. The active word (`chan_cfg_t`, 23
bits, most significant first) is:

| field          | bits | meaning |
|----------------|------|---------|
| `ana`          | 16   | gains, shaping times and thresholds for the analog front end, driven unchanged on `ana_cfg` |
| `tdc_en`       | 4    | TDCs that may be used |
| `trg_sel`      | 1    | 0: Trg1, 1: Trg2 |
| `mode`         | 1    | 0: SPC, 1: ToT |
| `ch_en`        | 1    | channel enable |

The published description does not give the widths of the analog settings, so the 16 bits are an
opaque field here.

**SPI frame** (`spi_cfg`: mode 0, MSB first). The port samples SCLK, CS_N and MOSI with the system
clock, so SCLK must stay below about a quarter of the clock frequency. A frame is sent with CS_N low:

1. An 8-bit header:
   * bit 7: update, which loads the shifted words into the active words of the column when the frame
     ends;
   * bits 6:2: reserved;
   * bits 1:0: column.
2. Data bits. Each one shifts the chain of that column by one position.

During the data bits, MISO shows the bit that leaves the chain. To configure a column, send its 8 x 23
bits with the row-7 word first, each word MSB first, and set the update bit. To read a column back,
send a frame without the update bit: the old words come out in the order they were written.

## Capacity

* **One channel at 5 MHz average (SPC):** fits easily. Four TDCs with a 150 ns dead time give 26.7
  Mhit/s peak, and the FIFO absorbs bursts.
* **All 32 channels at 5 MHz at once:** the links cannot carry it. Each link carries one word per 17
  periods, which is 18.8 Mword/s at 320 MHz, or 2.35 MHz sustained per channel for 8 channels. Even
  without framing, 32 channels x 5 MHz x 32 bits = 5.12 Gbit/s, against 4 x 640 Mbit/s = 2.56 Gbit/s.
  Bursts are absorbed by the TDCs and the FIFOs. A sustained overload loses hits at the channel
  inputs.
* **ToT mode:** each pulse gives two words, so the sustained limit is about 1.17 MHz of pulses per
  channel when all 8 channels of a column are busy.

## Where this RTL departs from, or adds to, the published chip

These are choices made here where the published description is silent:

* the 4 x 8 arrangement of the channels, with one link per column;
* a single clock for the channels and the End-of-Column;
* the four-phase handshake;
* the alternating arbitration in the chain;
* the payload bit order;
* the configuration word, the chain protocol and the SPI frame;
* the link framing;
* the TDC arming order and the ToT pairing rule;
* the reset behaviour.

Two readings need particular care:

* **Gate of the synchroniser.** Its function is read as OR from the published 1.5 / 2.5-period delay.
  An AND would always give 2.5 periods.
* **The per-TDC readout element.** The published channel diagram shows a separate element for each
  TDC next to the controller. Its role is not explained, so here it is folded into the TDC model that
  produces the fine code.

The TDC model measures an ideal interval with `$realtime`. It has no nonlinearity, no jitter and no
calibration.

## Files

| file | what |
|------|------|
| `rtl/alcor_pkg.sv` | widths, `payload_t`, `chan_cfg_t`, `mode_e` |
| `rtl/alcor_top.sv` | the 32-channel top |
| `rtl/channel.sv` | one channel |
| `rtl/tdc_ctrl.sv` | TDC arming, trigger routing, results |
| `rtl/tdc_model.sv` | behavioural TDC (not synthesizable) |
| `rtl/coarse_counter.sv` | 15-bit coarse counter |
| `rtl/data_control.sv` | payload generator and chain multiplexer |
| `rtl/sync_fifo.sv` | 32 x 4 FIFO |
| `rtl/chan_cfg.sv` | configuration shift and update |
| `rtl/sync_dual_edge.sv` | dual-edge synchroniser |
| `rtl/hs_tx.sv` | column-side handshake sender |
| `rtl/eoc.sv` | End-of-Column |
| `rtl/spi_cfg.sv` | SPI configuration port |
| `rtl/lvds_ser.sv` | DDR link serialiser |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_rate_5mhz.sv` | random 5 MHz hit rate on the full chip |
| `tb/tb_sync_sweep.sv` | synchroniser delay from 40 to 250 MHz |

Top-level parameters are `NCOL` (4), `NROW` (8), `DEAD_CYCLES` (48), `BIN_PS` (50) and `FIFO_DEPTH`
(4). The channel ID is 5 bits wide, so `NCOL * NROW` must not exceed 32.

## Simulating

Every testbench checks itself and ends with a line `TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_alcor_top \
        -y rtl -y tb +libext+.sv -Irtl rtl/alcor_pkg.sv tb/tb_alcor_top.sv
    ./obj_dir/Vtb_alcor_top

Replace `tb_alcor_top` by any other testbench name. All files declare `timeunit 1ns`. The testbenches
run a 320 MHz clock with 100 fs precision.

`tb_alcor_top` runs the full 32-channel design at its default parameters, in about 10 s of wall time.
It:

* configures every column over SPI and reads one column back;
* sends sparse hits to all channels, eight of them in ToT mode;
* sends a burst that fills the FIFOs of one column and loses one hit on purpose;
* decodes the four links and matches every word against timestamps computed in the testbench.

It counts each mechanism (SPC and ToT words, lost hit, full FIFO, merging in the chain, back-to-back
frames, read-back) and fails if one never happens. The block testbenches cover the same mechanisms
one block at a time. They also check the synchroniser's exact delay for every input time, the TDC dead
time in cycles, and the link's 17-period frame spacing.

Two further testbenches measure performance:

* `tb_rate_5mhz` drives random hits, exponentially spaced with a 5 MHz mean, into the full chip in
  photon counting mode. With one channel per column active, every hit arrives (406 of 406). With all
  32 channels active, all four links run at their full 188 words per 10 us, and about 58% of the hits
  arrive; the rest are lost at the channel inputs while the TDCs and FIFOs wait for the link.
* `tb_sync_sweep` runs the synchroniser alone at 40, 80, 160, 200 and 250 MHz and checks that its
  delay stays between 1.5 and 2.5 clock periods at every frequency.
