# A 24-channel drift-tube TDC with triple-redundant control logic

This is the digital core of a time-to-digital converter (TDC) for the
front end of muon drift-tube chambers. Each of 24 channels receives the
discriminated signal of one tube. The core stamps both the leading and the
trailing edge of each pulse with a 17-bit time: 0.78 ns bins covering
102.4 us between bunch-count resets. It turns each pulse into a 32-bit hit
word (leading time plus pulse width), or into one word per edge.

The hits are read out in one of two ways:

- **Triggerless:** every hit is streamed out as soon as it is built.
- **Triggered:** hits wait in a per-channel ring buffer. Each trigger
  collects the hits inside a time window into one event.

The output is two 8b/10b-coded serial lanes at 320 Mb/s each. That gives
64 Mbyte/s of payload, enough for about 660 kHz of pulses on every channel
at once.

The core is meant for a radiation environment. The registers that steer
the data flow in the critical blocks are triplicated with majority voting
and self-correction:

- the TTC decoder and event builder state machines
- the pointers of the channel and readout FIFOs
- the serial link's symbol timer
- the configuration registers

Timing data (hit times, FIFO contents) is not triplicated. A single upset
there spoils at most one hit, while an upset in a control register could
corrupt every hit that follows.

Everything is SystemVerilog (IEEE 1800-2017) in `rtl/`, with one
self-checking testbench per module in `tb/`.

## Block map

```
 hit[23:0] --> tdc_channel x24 ---------------------------------------+
               |  tdc_edge_sampler + tdc_coarse_counter (leading)  \  |
               |  tdc_edge_sampler + tdc_coarse_counter (trailing)  > |
               |                                  tdc_hit_builder     |
               |                               |                      |
               |  triggerless: ----------------+--> channel FIFO (4)  |
               |  triggered:  ring buffer (16) -> trigger matcher -^  |
               +------------------------------------------------------+
 ttc --> tdc_ttc_decoder --> trigger / BCR / ECR / master reset
 trigger_pin, TTC trigger --> tdc_trigger_interface --> trigger FIFO (16)
 channel FIFOs --> tdc_channel_mux (triggerless)    \
 channel FIFOs --> tdc_event_builder (triggered)     > readout FIFO (16)
 readout FIFO --> tdc_serial_interface (tdc_enc8b10b x2) --> dout[1:0]
 tck/tms/tdi/trst_n --> tdc_jtag_tap <--> tdc_config_regs (setup, control), status
```

`tdc_top` wires these blocks together. The shared building blocks are:

- `tdc_fifo`: a FIFO, with or without triplicated pointers.
- `tmr_fsm_reg`, `tmr_reg` and `tmr_voter`: the two triplicated register
  cells and their voter.
- `tdc_pkg`: word formats, register layouts and constants.

## Measuring time

The core has three clocks, which come from an on-chip PLL that is not part
of this RTL:

- `clk320`: 320 MHz
- `clk320_90`: the same clock shifted by 90 degrees
- `clk160`: 160 MHz

**Fine time.** `tdc_edge_sampler` samples its input on four instants in
each 3.125 ns period: the rising and falling edges of both 320 MHz clocks.
This splits the period into four bins of 0.78125 ns. At the end of each
period it looks at the four samples and the last sample of the previous
period. An edge is the first place where the input changes from low to
high, and the index of that place (0 to 3) is the fine time.

**Coarse time.** A 15-bit counter at 320 MHz (`tdc_coarse_counter`, one per edge sampler)
supplies the coarse time. The full time is `{coarse, fine}`, that is
`coarse*4 + fine`. A time of 0x04a4d, for example, means coarse 0x1293 and
fine 1. The counter rolls over every 2^15 x 3.125 ns = 102.4 us. A
bunch-count reset (BCR) clears it; BCR is synchronised into the 320 MHz
domain and acts on its rising edge.

**Trailing edges.** A second sampler on the inverted input times the
trailing edge, so each channel has two samplers.

**Crossing into the 160 MHz logic.** Every detected edge toggles a flag.
The toggle passes through a flip-flop synchroniser into the 160 MHz domain.
The sampler holds the edge time until its next edge of the same polarity,
and the 160 MHz side takes it once it sees the toggle. So edges of the same
polarity must be at least three 160 MHz cycles (19 ns) apart to be
resolved. A hit word reaches the channel FIFO about six 160 MHz cycles
after its edge.

## Hit words

`tdc_hit_builder` turns edges into words. Bits are numbered from 31 down.

**Pair mode** (the default) gives one 4-byte word per pulse:

| Field | Bits |
| --- | --- |
| channel | 31:27 |
| mode `11` | 26:25 |
| leading time | 24:8 |
| width | 7:0 |

- The width is the trailing time minus the leading time, in 0.78 ns bins.
  It saturates at 255 (199 ns).
- A second leading edge before any trailing edge replaces the first.
- A trailing edge that has no leading edge is dropped.

**Edge mode** gives one 3-byte word per enabled edge:

| Field | Bits |
| --- | --- |
| channel | 23:19 |
| mode | 18:17 |
| time | 16:0 |

- Mode `01` marks a leading edge and `10` a trailing edge.
- `rise_en` and `fall_en` choose which edges are reported.

**Triggered mode** wraps the hits of each event in two extra words:

| Word | Bits 31:27 | Bits 26:12 | Bits 11:0 |
| --- | --- | --- | --- |
| header | `11110` | trigger coarse time | event id |
| trailer | `11111` | bits 26:24 `000`, bits 23:12 event id | hit count |

Channel numbers stop at 23, so the codes 30 and 31 in bits 31:27 cannot be
mistaken for a hit word.

On the link, words are sent most significant byte first. The receiver tells
word lengths apart from the first byte of each word:

- The 5-bit code `11110` or `11111` means a header or trailer (4 bytes).
- Otherwise, mode `11` means a pair word (4 bytes).
- Any other mode means an edge word (3 bytes).

## Triggered readout

The trigger comes from the TTC line or from the trigger pin; the setup bit
`ext_trig` selects which. `tdc_trigger_interface` stamps each trigger with
a 160 MHz copy of the coarse time. The copy advances by 2 per cycle, is
cleared by BCR, and only the chip reset resets it. This keeps it in step
with the sampling counter across soft resets. The trigger interface writes
`{event id, time}` into the 16-word trigger FIFO. A full trigger FIFO drops
the trigger and sets the sticky `trig_ovf` status bit. The event id still
advances, so a dropped trigger shows as a gap in the ids.

`tdc_event_builder` runs the events one at a time:

1. Take the oldest trigger and start the matcher of all 24 channels.
2. Send the header.
3. Visit channels 0 to 23 in turn. For each, copy its matched hits until
   its matcher is done and its FIFO is empty.
4. Send the trailer, carrying the number of hits sent.

Each channel's `tdc_trigger_matcher` scans the 16 places of its ring
buffer, oldest first, one place per cycle. A valid hit matches if:

```
(hit_coarse - (trigger_coarse - search_offset)) mod 2^15  <  match_window
```

- `hit_coarse` is the coarse part of the hit's leading time (or of the edge
  time in edge mode).
- The window opens `search_offset` coarse units (3.125 ns each) before the
  trigger and is `match_window` units wide.
- The defaults are an offset of 2 us and a window of 1 us.
- Matched hits go into the 4-word channel FIFO. The scan stalls while that
  FIFO is full.
- A hit stays in the ring buffer until it is overwritten, so overlapping
  windows can both report it.
- The ring buffer keeps the last 16 hits of its channel. With a 2 us search
  offset, hits are lost before they are matched only above about 16 hits
  in 2 us on one channel.

In triggerless mode `tdc_channel_mux` takes one word per cycle from the
channel FIFOs in round-robin order. If the readout path is slower than the
hits, a 4-word channel FIFO overflows, drops the hit, and sets that
channel's sticky `chnl_ovf` status bit.

## Serial link

`tdc_serial_interface` reads the 16-word readout FIFO and cuts each word
into bytes. It spreads the byte stream over both lanes: in every symbol
period, lane 0 carries the next byte and lane 1 the one after it.

- A lane with no byte to send carries K28.5 (`BC`, a control symbol). The
  receiver drops these, and they give it the symbol alignment.
- Each lane keeps its own running disparity. `tdc_enc8b10b` holds the
  standard 8b/10b code tables.
- A 10-bit symbol takes five 160 MHz cycles. The lane outputs two bits per
  cycle (`dout[l][1]` first) for a double-data-rate output driver, which
  gives 320 Mb/s.
- After reset both lanes start with K28.5, and they stay in symbol step.

**Receiving the stream:**

1. Find K28.5 on lane 0.
2. Decode both lanes every 10 bits.
3. Drop the commas, take lane 0's byte before lane 1's, and cut words as
   described under "Hit words".

`tb/tdc_top_tb.sv` contains such a receiver.

## Single-event upset protection

Two triplicated cells are used, one for each kind of register.

**Registers that compute their own next value** (state machines, FIFO
pointers, the link's symbol timer) use `tmr_fsm_reg`:

- The cell holds three register copies and three voters.
- The module that uses it writes its next-state logic three times, in a
  three-way generate loop.
- Copy *i* of the logic reads voter *i* and loads register *i*.
- The module's outputs come from copy 0.

An upset in one register copy is outvoted at once and overwritten at that
copy's next clock edge. A transient in one copy of the logic, or in one
voter, reaches only one register copy and is corrected the same way.

**Registers loaded from outside** (the setup and control registers,
written through JTAG) use `tmr_reg`:

- Three copies, each on its own clock input, and three voters.
- When the register is not being written, each copy reloads the voted
  value at its next clock edge. This scrubbing keeps upsets from building
  up in a register that sits unchanged for hours.
- These registers are clocked by TCK, so they are scrubbed only while TCK
  runs. Between scrubs the vote still masks a single upset copy.

The triplicated registers are:

- the TTC decoder and event builder state machines
- the read and write pointers of the channel and readout FIFOs
- the serial interface's symbol timer, byte counter and running
  disparities, with the byte-fetch logic and the encoders that update them
- the setup and control registers

The following are single copies:

- the trigger FIFO pointers and the ring buffers
- the FIFO data and all time values
- the serial shift registers and the word being sent

In this RTL the three clock inputs of each cell are tied to one clock net.
Spreading them over separate clock trees is a layout matter. Synthesis and
layout must be told to keep the three copies of registers, voters and
logic: the copies are logically equal, and a tool that merges equal logic
removes the protection. Check the netlist for this after synthesis.

## Control

**TTC line.** The line is idle low. A command is one start bit followed by
three bits `{ECR, BCR, trigger}` at 160 MHz. Any combination may be set,
and `111` means master reset.

**Bunch-count reset** has three sources:

- the TTC BCR command
- the dedicated `bcr_pin`
- a rising edge of the control bit `bcr_sw`

**Resets:**

- `rst_n` resets the whole chip.
- The TTC master reset and the control bit `soft_reset` reset the 160 MHz
  logic only: hit building, FIFOs, matching, event ids and status flags.
- The coarse counters and the serial link keep running, so the receiver
  stays aligned and times keep their meaning. A word that is being sent
  when the reset comes is still sent in full.

Change the setup register while `soft_reset` is set. The logic reads the
setup register as static; it is clocked by TCK.

**JTAG.** The interface is a standard IEEE 1149.1 TAP with a 4-bit
instruction register. Data registers shift least significant bit first.

| Instruction | Code | Register | Length (bits) |
| --- | --- | --- | --- |
| IDCODE | 1 (after reset) | `32'h1D7C_0A0F` | 32 |
| SETUP | 2 | setup, read/write | 59 |
| CONTROL | 3 | control, read/write | 2 |
| STATUS | 4 | status, read only | 26 |
| BYPASS | F and every unused code | bypass | 1 |

Setup register, from MSB to LSB (bit 0 is shifted first):

| Field | Width (bits) | Reset value |
| --- | --- | --- |
| `trig_mode` | 1 | 0 (triggerless) |
| `pair_mode` | 1 | 1 |
| `rise_en` | 1 | 1 |
| `fall_en` | 1 | 0 |
| `ext_trig` | 1 | 0 |
| `chnl_en` | 24 | all ones |
| `match_window` | 15 | 320 |
| `search_offset` | 15 | 640 |

The control register is `{soft_reset, bcr_sw}`. The status register is
`{chnl_ovf[23:0], trig_ovf, rdo_full}`. All status bits are sticky until a
reset; `rdo_full` records that the readout FIFO was ever full.

## Where this design departs from the published chip

The block set follows the published chip: 24 two-edge channels, 16-word
ring buffers, 4-word channel FIFOs, 16-word trigger and readout FIFOs, and
2 x 320 Mb/s 8b/10b lanes with K28.5 idle. So do the times (0.78 ns bins,
102.4 us range, time = coarse x 4 + fine), the pair-mode word, the `01`
edge-mode code, and which blocks are triplicated.

The rest was not published and is this design's own:

- **Coarse counters.** As in the chip's block diagram, each edge sampler
  has its own 320 MHz coarse counter (48 in all). How they are cleared is
  this design's own: all start at the chip reset and a bunch count reset
  clears all of them in the same cycle, so they always agree.
- **Formats and protocols:**
  - the edge-mode word length and the trailing-edge code `10`
  - the header and trailer words
  - the byte order and how bytes are spread over the lanes
  - the TTC line code
  - the register layouts and the JTAG instruction codes
- **Algorithms:** the trigger matching and its window parameters, the
  round-robin channel mux, and the channel order of the event builder.
- **Clock-domain crossing:** the 160 MHz logic clock and the toggle
  handshake.

**Not built:**

- the PLL that makes the three clocks from the 40 MHz bunch clock
- the LVDS receivers and drivers (the ports are their core-side signals)
- the serial configuration port of the front-end amplifier chip

## Simulating

Every module has a self-checking testbench, `tb/<module>_tb.sv`. Each
testbench:

- ends by printing `TB_RESULT checks=N failures=M`
- has a watchdog
- declares `timeunit 1ps`

With verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/tdc_pkg.sv tb/tb_8b10b_pkg.sv tb/tdc_top_tb.sv --top-module tdc_top_tb
./obj_dir/Vtdc_top_tb
```

Replace `tdc_top_tb` with any other testbench name.
`tb/tb_8b10b_pkg.sv` holds the 8b/10b decoder that the link testbenches
use.

`tdc_top_tb` runs the whole core with every parameter at its default and
the real clock rates. It takes the core through these phases:

1. Read IDCODE and the setup register.
2. Send a BCR.
3. Triggerless pair mode with pulses on all 24 channels.
4. Triggerless edge mode with one channel disabled.
5. Triggered mode with TTC triggers and with the trigger pin. Some hits lie
   inside the window and some outside, and the testbench checks header,
   hits and trailer.
6. A trigger burst that overflows the trigger FIFO.
7. A hit burst that fills the readout FIFO and overflows channel FIFOs.
   The testbench reads back the status register.
8. A TTC master reset.
9. A BCR from the pin.
10. Forty register upsets forced into triplicated registers while hits are
    being read out.

The testbench computes the expected times from the simulation time of each
pulse edge. It counts every mechanism it exercises and fails if any never
happened. It simulates about 200 us, in well under a second.

`tdc_rate_tb` runs the core in triggerless pair mode under random traffic
on all 24 channels for 40 us at each of three rates per channel. It
measures the latency from a pulse's trailing edge to the last symbol of its
word at the receiver. Typical results over a few seeds:

| Rate per channel | Loss | 99% latency |
| --- | --- | --- |
| 200 kHz | none | about 0.2 us |
| 400 kHz | none | 0.27 to 0.40 us |
| 660 kHz | up to 1% | 0.6 to 6 us |

At 660 kHz the link is 99% loaded, so queues grow and a random burst can
overflow a channel FIFO. Use `+verilator+seed+N` to vary the sequence.

The block testbenches check each module in isolation. Examples:

- `tmr_reg_tb` upsets a copy, stops one clock, and glitches another.
- `tmr_fsm_reg_tb` upsets register copies and corrupts one copy of the
  next-state logic.
- `tdc_enc8b10b_tb` checks all 256 data bytes and K28.5 against a decoder,
  in both disparities.
- `tdc_jtag_tap_tb` repeats IDCODE and setup write/read-back checks with
  all zeros and all ones.
