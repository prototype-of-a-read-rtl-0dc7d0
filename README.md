# STCF-ROC: read-out controller for pixel-chip data collection and command distribution

The inner tracker of the Super Tau-Charm Facility uses pixel chips (STCFpix,
200 × 80 pixels) that each send hit data over one 8b/10b serial link at
400 Mb/s. The read-out controller (ROC) sits between up to eight of these
chips and a gigabit optical transceiver. Upstream it collects the eight
links, strips their filler, caches the data, and rebuilds them into one
package per trigger. The packages leave on up to eight 400 Mb/s output lanes.
Downstream it supplies the chips with their 40 MHz clock, passes triggers on
to them, and delivers CRC-protected control commands, both to the chips and
to its own configuration.

This repository holds synthesizable SystemVerilog for the whole digital part
of that controller, with self-checking testbenches. It follows the ASIC's
published architecture: its block diagram, its eight-by-eight structure, its
400 Mb/s 8b/10b links, its 40 MHz clock and its CCITT CRC-16. The published
description gives what each block does, but not the formats or the internals.
Every encoding, framing, register map, FIFO size and timing detail below is
therefore this implementation's own choice. Each choice is marked as such.

## Data path at a glance

```
 sdi[i] ─► preproc[i] ──────► crossbar ──────► reassembly[j] ─► sdo[j]
 (chip i)  deser+align        ch i → lane      trigger-ID FIFO
           8b/10b decode      ch_dest[i]       reformat (+busy)
           idle removal                        8b/10b encode
           busy extraction                     serializer
           FIFO (64 × 9 bit)
                    ▲                ▲               ▲
                    └──── ctc: clock, trigger, commands, configuration
                    busy_status: FIFO almost-full + chip busy ─► busy_out
```

There is one clock, `clk`, which is the 400 MHz bit clock. Every serial
line moves one bit per `clk`. The CTC divides `clk` by 10 to get `tick`, a
one-cycle strobe at 40 MHz. `tick` sets the character rate of the output
lanes and the bit rate of the command line. `clk40_out` is the same 40 MHz,
with a 50 % duty cycle, sent to the chips. Reset is `rst_n`: asynchronous
and active low.

## Input links and preprocessing (`preproc`, `deser_align`)

Each channel shifts its serial line into a 10-bit window. It looks for the
K28.5 comma, in either running disparity. A comma fixes the word boundary
and sets `locked`. From then on, a word is taken every 10 clocks. A comma
found at another phase moves the boundary and is counted. Each word is
decoded by the table-based 8b/10b decoder in `roc_pkg`. The decoder flags
unknown sub-blocks. The channel also tracks the link's running disparity,
starting from the first unbalanced word after lock. A word with the wrong
disparity is counted in `err_cnt` but kept, because it still decoded.

The chip link protocol assumed here is:

| character | meaning on a chip link | what the channel does |
|-----------|------------------------|-----------------------|
| K28.5 | idle | dropped |
| K28.2 | chip busy-on | sets `chip_busy`, not stored |
| K28.3 | chip busy-off | clears `chip_busy`, not stored |
| K28.0 | end of the chip's frame for one trigger | stored as an `eof` word |
| D.x.y | event data byte | stored |
| other K, code errors | — | dropped and counted in `err_cnt` |

The channel caches stored words in a 64 × 9-bit first-word-fall-through FIFO
(`sync_fifo`). It raises `almost_full` at 48 words. A word that arrives when
the FIFO is full is lost, and the sticky `overflow` flag is set. A word can
be read from the FIFO two clocks after the clock edge that samples its last
bit. If the channel's enable bit is cleared, the channel stores nothing.

The model assumes each chip answers every trigger it receives with exactly
one frame, ending in K28.0. The controller's package building relies on this.

## Crossbar (`crossbar`)

The crossbar is purely combinational. Each channel has a 3-bit destination
lane (`ch_dest`) and an enable bit (`ch_en`). Lane *j* sees channel *i* when
`ch_en[i] && ch_dest[i] == j`. A lane therefore can collect any subset of
channels, while a channel feeds at most one lane, which keeps FIFO reads
unambiguous. The crossbar gates the FIFO heads and non-empty flags per lane.
It also routes each lane's read strobes back to the channel FIFOs, and a
strobe from a lane that does not own a channel is ignored. The default
mapping is one to one (channel *i* → lane *i*).

## Packages on the output lanes (`reformat`, `reassembly`)

Each lane holds a 16-entry trigger ID FIFO. The CTC writes the number of
every accepted trigger into the FIFO of each lane that has at least one
channel. For each trigger ID, the lane's `reformat` state machine emits one
package. It visits the lane's channels in ascending index order, taking
each channel's data up to that chip's end-of-frame mark:

```
K27.7 (SOP)  TID[15:8]  TID[7:0]
   K23.7 (CHIP)  chip_id[i]  data ...        ← once per channel on the lane
K29.7 (EOP)
```

One character leaves per `tick`, so one 10-bit code leaves every 10 clocks
(400 Mb/s). When no character is due, the slot carries K28.5, which also
keeps the receiver aligned. If the current channel's FIFO is empty, the lane
waits inside the package and sends idles; each such wait is counted in
`stall_cnt`. A lane whose chip never sends its frame waits indefinitely,
because there is no timeout. A lane with no channels still emits
`SOP TID EOP` for a trigger ID it holds, but the top level never gives such
a lane a trigger ID.

**Busy reports.** A lane's busy state is {ROC busy, busy flags of the chips
on that lane}. Whenever this state changes, the lane inserts a three-character
report:

```
K28.2 (busy-on, something busy) or K28.3 (busy-off, nothing busy)
{7'b0, roc_busy}   chip busy mask (bit i = channel i)
```

Reports go out either between packages or while the lane waits for data
inside a package. They never interrupt a channel's data once it flows. A
receiver can remove them by dropping every K28.2 or K28.3 together with the
two bytes after it. The end-to-end testbench parses the lanes this way.

The encoder (`enc8b10b`) is standard 8b/10b with running disparity,
registered. The serializer sends code bit 9 (8b/10b bit 'a') first. A
character's first bit reaches `sdo` three clocks after its tick.

## Busy (`busy_status`) and trigger veto

`roc_busy` is high while any enabled channel FIFO, or any lane's trigger ID
FIFO, is almost full. `chip_busy_any` is high while any enabled chip reports
busy. `busy_out`, the OR of both, goes to the backend. Inside the ROC, the
same busy signal adjusts the trigger handling: when the `busy_veto` bit is
set (the default), triggers that arrive while `busy_out` is high are not
passed to the chips and are counted in `trig_veto_cnt`.

## Clock, trigger and control (`ctc`, `ctc_trigger`, `ctc_cmd`, `crc16_ccitt`)

**Triggers.** A rising edge on `trig_in` is a trigger. Depending on
`trig_mode`, the trigger is handled as follows:

| mode | `trig_out` |
|------|-----------|
| 0 direct | one-clock pulse, one clock after the edge |
| 1 opcode (default) | the 8-bit `trig_opcode` (default 0xA5), MSB first, one bit per clock, first bit one clock after the edge |
| 2, 3 off | nothing; triggers counted as vetoed |

An accepted trigger gets the next 16-bit trigger ID, starting at 0. In the
same clock as the first output bit, the trigger ID is pushed into the lanes.
An edge that arrives while an opcode is still being sent is dropped and
counted in `trig_lost_cnt`. The opcode must begin with a 1 so that a chip
can find its start on an otherwise-low line.

**Commands.** `cmd_sdi` carries one bit per tick, MSB first. A frame is:

```
0x7E  dest  addr  data[15:8]  data[7:0]  fcs[15:8]  fcs[7:0]
```

`fcs` is the CCITT CRC-16 of `dest..data`: polynomial 0x1021, preset 0xFFFF,
no final inversion. The receiver hunts for 0x7E, shifts in the next 48 bits
through the CRC, and accepts the frame only if the remainder is zero.
Frames that fail the check are dropped and counted in `crc_err_cnt`. A good
frame is executed only if `dest` is this controller's `roc_addr` or 0xFF
(broadcast):

| addr | action |
|------|--------|
| 0x00 | `ch_en` ← data[7:0] |
| 0x10 + i | channel i: `chip_id` ← data[15:8], `ch_dest` ← data[2:0] |
| 0x20 | `trig_mode` ← data[1:0], `busy_veto` ← data[2] |
| 0x21 | `trig_opcode` ← data[7:0] |
| 0x80 – 0xFF | chip command: the whole frame, sync byte included, is re-sent on `pix_cmd_sdo` |

`cmd_fwd_sdo` repeats `cmd_sdi` one tick later. It drives the command input
of the next controller on the same readout unit, which selects its own
frames by `dest`. After reset, all channels are enabled, channel *i* goes
to lane *i* with chip ID *i*, opcode mode is on, and the busy veto is on
(`roc_pkg::cfg_default()`).

## Files

| file | contents |
|------|----------|
| `rtl/roc_pkg.sv` | sizes, control characters, config struct, 8b/10b encode/decode functions |
| `rtl/stcf_roc.sv` | top level |
| `rtl/preproc.sv`, `rtl/deser_align.sv` | input channel: deserializer and aligner, filter, FIFO |
| `rtl/sync_fifo.sv` | FIFO used for channel data and trigger IDs |
| `rtl/crossbar.sv` | channel-to-lane routing |
| `rtl/reassembly.sv`, `rtl/reformat.sv`, `rtl/enc8b10b.sv`, `rtl/serializer.sv` | output lane |
| `rtl/busy_status.sv` | busy combination |
| `rtl/ctc.sv`, `rtl/ctc_trigger.sv`, `rtl/ctc_cmd.sv`, `rtl/crc16_ccitt.sv` | clock, trigger and control |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/pix_link_model.sv`, `tb/lane_monitor.sv`, `tb/cmd_frame_pkg.sv` | chip link model, lane receiver, command frame builder |

Parameters that can be changed: the channel FIFO depth and threshold
(`FIFO_DEPTH` = 64, `FIFO_AF` = 48) and the trigger ID FIFO depth and
threshold (`TFIFO_DEPTH` = 16, `TFIFO_AF` = 12), all on `stcf_roc`.
`N_CH`, `N_LANE` (8, as in the published design) and `TID_W` (16) live in
`roc_pkg`. `ch_dest` is 3 bits wide, so `N_LANE` must stay 8 unless that
field is widened as well.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
The expected results come from models written in the testbench itself, not
from the RTL. The 8b/10b testbench checks known code words, DC balance, run
length and round trip. The CRC testbench checks the standard check value
0x29B1 for "123456789" and uses its own bit-serial reference.

`tb_stcf_roc` runs the full design at its default sizes. It runs eight chip
link models, each with its own word phase, which answer every trigger
opcode they decode with a random frame. It also runs eight lane receivers.
The testbench first loads a configuration through commands: channels 0 and
1 share lane 0, lane 2 is unused, and one frame has a bad FCS while another
is for a different controller. It then fires 18 triggers. Every package on
every lane is compared with what the chips sent. The test also requires
each of the following to happen at least once: merged channels, a stalled
lane, a chip busy-on/off report, ROC busy from a filling FIFO, a trigger
vetoed by busy, a rejected command, and a re-sent chip command.

`tb_roc_modes` also runs the full design at its default sizes. It changes
the configuration by command between three runs. In run A, each chip has its
own lane and opcode triggers come at short intervals. In run B, all eight
chips share one lane, triggers are forwarded directly, and the intervals are
long. In run C, two groups of four chips use two lanes, one channel is
disabled, and the trigger opcode is changed. Every package is again compared
with what the chips sent.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/roc_pkg.sv tb/tb_stcf_roc.sv --top-module tb_stcf_roc
./obj_dir/Vtb_stcf_roc
```

Replace `tb_stcf_roc` with any other `tb_<module>` to run that testbench.
Testbenches that use command frames pick up `tb/cmd_frame_pkg.sv` through
`-y tb`.

## What is and is not modelled

- **LVDS receivers and drivers** are analog pads and are not in the RTL. The
  serial ports are single-ended logic signals.
- **The STCFpix data format** is not defined here beyond the character
  table above. Data bytes pass through the controller unchanged.
- **The published test environment** uses a JTAG driver. The interface of
  the chip's JTAG port is not published, so there is no JTAG port;
  configuration goes through the command line only.
- **Monitoring information**, which the published design carries on the
  uplink, is represented only by status counters brought out as top-level
  ports. There is no read-back path to the backend.
- **Triggers to the input channels.** The block diagram shows the CTC also
  feeding clock, control and trigger to the input channels. Here the input
  channels receive only their enable bit; trigger information reaches the
  data only through the lanes' trigger ID FIFOs.
- **Clock generation.** Everything runs on one 400 MHz clock. The 40 MHz chip
  clock is produced by division; clock recovery and PLLs are out of scope.
- **Missing chip frames.** A lane waiting for a chip frame that never comes
  has no timeout.
