# Data driven multi-channel TDC

This is synthesizable SystemVerilog for the digital core of a 32 channel
time-to-digital converter (TDC). The target is high-energy physics detectors.
A hit is timed by latching two things at the hit edge: a clock synchronous
coarse counter, and the state of a 32 tap delay locked loop (DLL) that splits
each DLL clock period into 32 bins. The DLL and counter clock can run at 40,
160 or 320 MHz, which gives bins of about 781, 195 or 98 ps.

The core is *data driven*. A measurement is stored only when a hit occurs. It
is kept in a buffer together with its time tag. When a trigger arrives later,
the matcher picks out the hits whose time tags fall in a window a programmed
latency before the trigger. The maximum trigger latency is therefore set by
the counter range, not by a pipeline depth. Triggers may overlap, since one hit
can belong to several events. The same buffers also work as plain FIFOs when
the TDC runs without triggers.

## Data path

```
 hit front ends (full custom, outside this RTL)
   │ per channel: strobe, edge, 32 DLL taps, two counter copies
   ▼
 tdc_channel ×8 ──► channel_arbiter ──► latency_buffer (256)      = tdc_group ×4
                                           │ scanned, not popped
 trigger ──► trigger_unit (16 deep FIFO) ──► trigger_matching ──► readout_fifo (256)
                                                                     │
                                      readout_interface (32 bit / byte / serial / JTAG, token)
 JTAG ──► jtag_tap: setup register (one parity bit), status register, readout register
```

| file | role |
|---|---|
| `hptdc_pkg.sv` | widths, `hit_t`, `trig_t`, the setup record `cfg_t` and its reset value, readout word codes, modular `coarse_diff` |
| `coarse_counter.sv` | coarse counter {bunch, DLL period} on the DLL clock, with roll-over and offset, plus a falling-edge copy |
| `hit_encoder.sv` | DLL taps → fine time; picks the safe counter copy; builds the time for the selected resolution; adds the channel offset |
| `tdc_channel.sv` | edge selection, pair mode, dead time, 4 deep derandomizer |
| `channel_arbiter.sv` | round-robin choice of one channel buffer per clock |
| `latency_buffer.sv` | 256 word circular buffer with a random read port |
| `tdc_group.sv` | 8 channels, arbiter and latency buffer |
| `trigger_unit.sv` | trigger time tag, event number, 16 deep trigger FIFO |
| `trigger_matching.sv` | event building over the four latency buffers |
| `readout_fifo.sv` | 256 word output FIFO with a programmable size |
| `readout_interface.sv` | parallel, byte, serial and JTAG readout; token passing |
| `jtag_tap.sv` | IEEE 1149.1 TAP with IDCODE, SETUP, STATUS, READOUT and BYPASS |
| `sync_fifo.sv` | show-ahead FIFO with word parity, used by several blocks |
| `hptdc_top.sv` | the whole core |

## Time measurement

The logic runs on `clk`, the 40 MHz bunch clock. One period of it is a
*bunch*. The coarse counter runs on `clk_dll`, which comes from a PLL at 1, 4
or 8 times `clk`, selected by the setup field `resolution`. `clk_dll` must be
phase locked to `clk`, with rising edges together. For the 40 MHz setting
`clk_dll` may simply be `clk`.

The counter is `{bunch[11:0], sub[2:0]}` (15 bits):

* `sub` counts DLL periods inside a bunch: always 0, 0–3, or 0–7.
* `bunch` runs from 0 to `roll_over` (3563 by default, one LHC orbit of 3564
  bunch crossings).

The rest of the logic sees only `bunch`, so it still counts in bunches. A bit
toggled by `clk` is sampled on `clk_dll`, and this keeps the bunch boundaries on
`clk` edges even after a reset or a change of resolution. A `bunch_reset` takes
effect at the next bunch boundary.

A time is `{bunch[11:0], bin[7:0]}`, 20 bits, in units of 25 ns / 256
≈ 98 ps at every setting. `fine` is the DLL tap (0–31):

| resolution | bin | bin size |
|---|---|---|
| 40 MHz | `{fine, 000}` | 781 ps |
| 160 MHz | `{sub[1:0], fine, 0}` | 195 ps |
| 320 MHz | `{sub[2:0], fine}` | 98 ps |

Time arithmetic is modulo `(roll_over+1)·256`. `coarse_diff()` in the package
does the modular subtraction on bunch counts and is used everywhere times are
compared. Trigger windows, latencies and the reject latency are all in
bunches.

A hit is asynchronous to the DLL clock, so the counter may be changing just as
it is latched. The counter therefore exists twice:

* `count_a` changes on the rising edge of `clk_dll`.
* `count_b` is a copy of it taken on the falling edge.

Each copy is stable during the half period in which the other one changes. The
DLL taps show where in the period the hit fell: the fine time is the position
of the single 1→0 step in the tap pattern.

* If the hit fell in the first half (fine < 16), `count_a` may be corrupt.
  The encoder uses `count_b` advanced by one DLL period.
* If it fell in the second half, the encoder uses `count_a`.

A tap pattern without exactly one step is reported as `legal = 0`, and the
hit is ignored. A per-channel offset of 0–255 units of 98 ps is then added,
modulo one counter turn.

The front-end latches are full custom circuits and are not part of this RTL.
The top exports `count_a`/`count_b` for them and takes, per channel:

* `hit_stb`: one clock long;
* `hit_leading`: the edge polarity;
* `hit_taps`, `hit_cnt_a`, `hit_cnt_b`: the latched values. The counts are the
  15 bit `{bunch, sub}` values of `count_a`/`count_b`.

## Channels and groups

Each channel keeps only the edges selected by `edge_mode`:

* leading only;
* trailing only;
* both;
* pair. In pair mode the channel holds the leading time. At the next trailing
  edge it stores one word with the leading time and the width in bins of the
  selected resolution. The width has 7 bits and saturates at 127.

After each stored edge the channel is blind for `dead_time` clocks. Words wait
in a 4 deep derandomizer. A hit that finds it full is dropped and reported.

The arbiter moves one word per clock from the 8 channel buffers of a group
into the group's latency buffer. The search starts after the channel served
last, so any channel that keeps requesting is served within 8 clocks. At
40 MHz a group can therefore take 40 M hits/s in total. Losses start when 8
channels together come near that rate. If the latency buffer is full, the word
is dropped and reported.

## Event building (`trigger_matching`)

This is the most involved block. A trigger stores
`{event id, bunch id = count, tag = count − trigger_latency}`. The matching
window is `[tag, tag + match_window)`, in bunch periods. The matcher handles
one trigger at a time, with a one-hot state machine:

1. **WAIT** until `now − tag ≥ match_window + MATCH_MARGIN` (8). This lets
   hits still passing through the channel buffers and the arbiter reach the
   latency buffer.
2. **HEADER**: write the header word. If `enable_occupancy` is set, an
   occupancy word follows. It gives the fill level of the four latency
   buffers at that moment, which is useful for watching how close they are to
   overflowing.
3. For each group in turn:
   * **CLEAN**: pop head hits that are older than the window start. Tags come
     in time order, so no later trigger can want them.
   * **SCAN**: read from the head through the second read port. Hits inside
     the window go to the readout FIFO, up to `max_hits` per event (0 means no
     limit). Hits over the limit are dropped and flagged.

   The scan does not remove anything. It stops at a hit later than the window
   end plus `MATCH_MARGIN`. Hits of a group reach the buffer in almost, but not
   exactly, time order, which is why the margin is needed.
4. **ERROR**: write an error word if any error flags are pending.
5. **TRAILER**: write the trailer word, then pop the trigger.

Because SCAN leaves hits in place, the next trigger sees the same hits again,
so overlapping windows both get them. Hits leave a latency buffer only through
CLEAN, or through the *reject* rule. While the matcher idles or waits, it
checks one group head per clock, in round robin. It pops the head if that hit
is older than `reject_latency` and is not inside a window that a queued trigger
still needs. Choose `reject_latency` ≥ `trigger_latency + match_window + 8`.

When the readout FIFO is full, the matcher stalls. This back pressure fills
the latency buffers, not the readout.

With `enable_matching = 0` the matcher streams every hit, round robin over the
groups, with no header or trailer.

## Readout words and interface

32 bit words; bits [31:28] give the type and bits [27:25] the TDC id:

| type | word | contents |
|---|---|---|
| 1 | occupancy | [27:0] four 7 bit latency buffer counts divided by 4, group 0 in [6:0]; no TDC id |
| 2 | header | [23:12] event id, [11:0] bunch id |
| 3 | trailer | [23:12] event id, [11:0] number of words including header and trailer |
| 4 / 5 | leading / trailing | [24:20] channel, [19:0] time |
| 6 | pair | [24:20] channel, [18:12] width (bins), [11:0] leading bunch |
| 7 | error | [6:0] flags, see below |

Error flags (`ERR_*` in the package):

* hit lost in a channel buffer;
* latency buffer overflow;
* hit limit reached;
* trigger lost because the trigger FIFO was full;
* memory parity error;
* illegal one-hot state;
* setup parity error.

Flags are sticky until an error word carries them. So the event that lost hits
is the one that gets marked, and `error` stays high meanwhile.

`readout_interface` works in one of four modes:

* **Parallel**: the word is on `data_out` while `data_ready` is high. It is
  taken on a clock where `get_data` is also high.
* **Byte**: the same handshake, four times per word, most significant byte
  first.
* **Serial**: `serial_out` sends the word MSB first, one bit per
  `2^serial_div` clocks. `serial_strobe` marks the sampling clock of each bit,
  and `data_ready` frames the word.
* **JTAG**: each word is offered to the TAP and read with instruction `4'hC`
  (READOUT). That instruction shifts out 33 bits, LSB first: the word, then a
  valid bit. Update-DR after a valid read releases the word. The two clock
  domains exchange toggles through two-flip-flop synchronisers, so a word is
  never lost or read twice. Change the readout mode only while nothing is
  being sent.

With `token_enable`, the chip sends only while it holds the token. It gets the
token from a `token_in` pulse. It passes the token on with a `token_out` pulse
after it has sent a trailer, or at once if it has nothing to send and is not
in the middle of an event.

## Programming, status and upset detection

All settings are in `cfg_t`, loaded through JTAG:

1. Shift instruction `4'h8` (SETUP) into the instruction register.
2. Shift `$bits(cfg_t)` bits, LSB first, followed by one parity bit. The
   parity bit makes the XOR of all bits zero.

The setup is copied to the core at Update-DR. A TAP reset restores
`CFG_DEFAULT`, which has the correct parity. `setup_parity_err` stays high
while the held setup breaks parity. This catches an upset in any setup bit.

Instruction `4'hA` (STATUS) captures, LSB first:

1. the pending error flags;
2. the trigger FIFO occupancy;
3. the readout FIFO occupancy;
4. the four latency buffer occupancies.

The IDCODE is a parameter.

Other upset detection:

* Every FIFO and buffer word carries a parity bit.
* The matcher and readout state machines are one-hot. Any state that is not
  one-hot raises the FSM flag.

`cfg` and `status` cross between `tck` and `clk` without synchronisers. Load
the setup while the TDC is idle.

## What is not here, and departures from the reference architecture

* **Analog parts are not modelled.** The PLL, the DLL, the hit latches and the
  input receivers are not in this RTL. Neither is the 4 tap R-C delay line.
  That line gives 25 ps bins by driving four ordinary channels, which are then
  calibrated with a code-density histogram off chip.
* **The logic clock is always 40 MHz.** The reference design can also run the
  logic at 80 or 160 MHz for higher hit rates. That option is absent: the
  matcher counts one bunch per logic clock.
* **A bunch period of 25 ns is divided into 256 units**, so the 40 MHz bin is
  781 ps.
* **Features not implemented:**
  * encoded trigger/reset inputs (separate pins are used);
  * DLL integral-linearity correction;
  * memory BIST, boundary-scan cells and the full-scan test mode;
  * low-power mode.
* **The channel derandomizer is a synchronous FIFO.** The reference design
  uses an asynchronous buffer.
* **The setup register is about 400 bits,** since it holds only the features
  above. Field widths, the dead time in clock cycles, the pair word layout,
  the word formats and `MATCH_MARGIN` are this design's own choices.
* **The memories are arrays with combinational read,** not a memory macro.

## Sizes and what they mean for hit rates

Each group has 8 channels sharing a 256 word latency buffer.

* **Channel rate.** 8 channels at 4 MHz each give 32 M words/s per group. The
  arbiter takes 40 M words/s, so that fits, with small losses from bursts.
* **Latency buffer occupancy.** The average is
  `8 · rate · trigger latency`. At 1 MHz per channel this is 80 words for a
  10 µs latency, 160 for 20 µs and 240 for 30 µs.
  * Keep it below half the buffer.
  * At 30 µs, fluctuations overflow the buffer. The affected events then carry
    the overflow flag.
* **Trigger rate.** The trigger FIFO holds 16 triggers. With 0.6 MHz hits on
  all 32 channels and a 20 bunch window, an event is about a dozen words, so
  triggers 1 µs (40 cycles) apart are read out without falling behind.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. Example with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/hptdc_pkg.sv \
    tb/tb_hptdc_top.sv --top-module tb_hptdc_top -o sim
./obj_dir/sim
```

`tb_hptdc_top` runs the full-size design (no parameter overrides) in eight
phases, in a few seconds of wall time:

* **A**: random hits and random, partly overlapping triggers across a counter
  roll-over, with channel offsets. Every event is checked hit for hit against
  a reference model. Then a trigger arrives every 40 cycles (1 MHz) and all
  39 events must come out complete and without errors.
* **B**: overload of one group. The error words must show channel loss,
  latency-buffer overflow and the hit limit.
* **C**: reject. The buffers must drain without triggers; this is read back
  over JTAG.
* **D**: untriggered pair measurements through byte readout.
* **E**: triggered trailing edges through serial readout with token passing,
  with occupancy words.
* **F**: trigger matching at 160 and 320 MHz, with the DLL clock 4 and 8 times
  `clk`. Every event is checked hit for hit.
* **G**: triggered events read out through JTAG.
* **H**: a setup with bad parity.

The testbench counts how often each mechanism occurred. A mechanism that never
occurred is a failure.

`tb_rate_workload` drives one group with random hits at 1 and 4 MHz per channel.
It then measures:

* hit loss;
* derandomizer occupancy;
* latency buffer occupancy at 10, 20 and 30 µs trigger latency.

The simulator has two states. Randomly initialised memories are harmless: the
parity checks only look at words that are actually held.
