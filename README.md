# AMT: a 24-channel TDC with trigger matching

This is a synthesizable SystemVerilog model of a time-to-digital converter
(TDC) for drift-tube muon chambers, the AMT architecture. Each of 24 hit
inputs carries a discriminator pulse. The chip measures the time of the
leading and trailing edges with 0.78125 ns bins and keeps the measurements
in a level-1 (L1) buffer. When a level-1 trigger arrives, the chip picks out
only the hits that belong to that trigger and sends them off the chip,
framed as an event.

The main idea is to measure every hit and select later. Hits are not
filtered when they arrive. They sit in a 256-word circular buffer. The
trigger selects them by time, several microseconds later, by comparing
times. The trigger carries no pointer into the buffer.

```
 hit[23:0] ─► channel buffers (4 words each, clocked by the hit edges)
                 │  taps + coarse counters latched at each edge
                 ▼
            channel controller (round robin) ─► encoder ─► L1 buffer (256)
                                                              │ random read
 trigger ─► trigger interface ─► trigger FIFO (8) ─► trigger matching
                                                              │
                                          read-out FIFO (64) ◄┘
                                                 │
                               parallel 32-bit port / serial DS link
 12-bit register bus, JTAG ─► control/status registers, memory self test
```

## Measuring time: ring oscillator, taps and two coarse counters

`pll_ringosc` is a behavioural model, not logic. It stands for a PLL that
locks a 16-stage ring oscillator to twice the 40 MHz beam clock. This splits
the 12.5 ns period of the 80 MHz clock into 16 bins. The oscillator's 16
outputs (`taps`) hold a block of eight ones that moves by one position per
bin. In bin `j`, tap `i` is high when `(j - i) mod 16 < 8`.

- The fine time is the position `j` where tap `j` is high and tap `j+1` is
  still low.
- `clk80` is tap 0.
- The 40 MHz system clock is the reference clock itself, in phase with it.
- The model is driven by delays and is not synthesizable. Synthesis sees
  its 80 MHz side as constant.

`coarse_counter` holds two 13-bit counters, each with its own parity bit:

- Counter A counts rising edges of `clk80`.
- Counter B copies A on the falling edge.

A hit edge can land just as A is changing. Each of the two counters is
stable in a different half of the period, so one of them can always be
trusted. The encoder picks the counter by the fine bin:

| fine bin | counter used | why |
|---|---|---|
| 4..11  | A     | far from A's change at bin 0 |
| 12..15 | B     | B has caught up with A |
| 0..3   | B + 1 | A may be changing; B still holds the previous count |

An edge time is `{coarse[12:0], fine[3:0]}`: 17 bits of 0.78125 ns, a range
of 102.4 µs.

At a bunch count reset, counter A is loaded with `{coarse_time_offset, 0}`.
It wraps after `{count_roll_over, 1}`. Bits 16:5 of an edge time are
therefore the bunch number, in units of 25 ns.

## Channel buffers: the hit is the clock

`channel_buffer` is a 4-word asynchronous FIFO. The hit input itself is its
write clock:

- On the rising edge, it stores the taps and both counters as the leading
  edge.
- On the falling edge, it stores them again as the trailing edge and moves
  the Gray-coded write pointer on.

The pointer crosses into the 40 MHz domain through two flip-flops, so a hit
shows up as valid 2–3 system clock cycles after its trailing edge. A hit
that finds all four words in use is lost. The lost hit toggles a flag that
becomes a one-cycle `overflow` pulse in the 40 MHz domain. Channels disabled
in CSR13/14 ignore their input.

`channel_controller` grants one waiting channel per cycle, round robin. The
grant pops that channel's buffer into `encoder_formatter`. The encoder
decodes the fine time, picks the coarse counter and checks its parity. It
then writes one of the following into the L1 buffer, one word per cycle:

- a leading-edge word and a trailing-edge word, or
- either one alone, or
- one pair word: the leading time plus the pulse width, given as
  `(trailing - leading) >> width_select` and saturated to 8 bits.

## L1 buffer and trigger matching

`l1_buffer` is 256 words of 33 bits: a 2-bit type, a 5-bit channel, an 8-bit
width, a 17-bit time and a parity bit.

- **Writes** are circular.
- **Start pointer.** The trigger matching owns it; it marks the oldest word
  any future trigger can still need. Occupancy is the write pointer minus
  the start pointer.
- **Reads** are random access, with one cycle of latency. The data holds
  until the next read.
- **Full buffer.** A write into a full buffer is dropped and sets
  `l1_overflow`. `l1_over_recover` rises once occupancy is back below 224.

`trigger_interface` keeps two counters:

- The **trigger time counter** counts 40 MHz cycles. A bunch count reset
  loads it with `bunch_count_offset`, at the same moment the coarse counter
  is loaded.
- The **event counter** is loaded with `event_count_offset` by an event
  count reset and counts triggers.

Set the offsets so that `coarse_time_offset - bunch_count_offset` equals the
trigger latency in bunches. A trigger's time tag is then the bunch number of
the hits that caused it.

Triggers and resets arrive on one of two kinds of input:

- **Separate pins.** Used when `enb_sepa_bcrst` and `enb_sepa_evrst` are both
  set.
- **Encoded.** Otherwise they arrive as 3-bit codes on the trigger line: a 1
  followed by `00` trigger, `10` bunch reset, `01` event reset, or `11`
  master reset (only with `enb_mreset_code`).

`trigger_fifo` queues up to 8 triggers. A trigger that finds the FIFO full is
lost and sets a sticky overflow flag. It also sets a `lost` bit on the next
trigger that is stored.

`trigger_matching` is the core of the chip. It takes one trigger (tag T) at a
time and scans the L1 buffer from the start pointer, two cycles per word. For
each hit, `d = bunch(hit) - T` is taken modulo `count_roll_over + 1` and
folded into ±half the range; with 4096 bunches that is ±51.2 µs. Then:

| d | action |
|---|---|
| `d < -mask_window` | too old for any later trigger: dropped (the start pointer moves past it, as long as nothing before it was kept) |
| `-mask_window ≤ d < 0` | sets the channel's mask flag (a hit just before the window may hide one inside it) |
| `0 ≤ d ≤ match_window` | written to the read-out FIFO |
| `match_window < d ≤ search_window` | skipped, kept for later triggers |
| `d > search_window` | scan ends |

The event is written as:

1. a header: event id and trigger tag;
2. the matched hits;
3. a mask word with all 24 flags, if any flag is set;
4. an error word with the enabled error flags, if `enb_errmark` is set and
   any flag is up (this is the chip's "error packet"; it repeats in every
   event until the flags are cleared);
5. a trailer: event id and a word count that includes the header and the
   trailer.

With `enb_relative`, hit times are given relative to `T * 32`. A full
read-out FIFO stalls the scan. With `enb_rofull_reject`, the hit is dropped
instead and counted as an error.

When no trigger is waiting and `enb_auto_reject` is set, old hits are
removed. A reject counter, loaded with `reject_count_offset` at the bunch
reset, gives the limit: the word at the start pointer is dropped if it is
older than this counter. This keeps the L1 buffer from filling while
triggers are rare. With `enb_match` cleared, every L1 word is passed straight
to the read-out FIFO.

### Read-out words

Every read-out word is 32 bits: a 4-bit ID, the 4-bit `tdc_id` from CSR9,
then the 24 data bits listed here.

| ID | word | data bits |
|---|---|---|
| 1010 | header | event id[11:0], trigger tag[11:0] |
| 1100 | trailer | event id[11:0], word count[11:0] |
| 0011 | leading edge | channel[4:0], 00, time[16:0] |
| 0100 | trailing edge | channel[4:0], 00, time[16:0] |
| 0101 | pair | channel[4:0], width[7:0], time[10:0] |
| 0010 | mask flags | flags[23:0] |
| 0110 | error | 15 zeros, error flags[8:0] |

## Read-out: parallel port and serial link

`readout_fifo` holds 64 words with parity, and its head word is always
visible. `readout_interface` sends the words off the chip in one of two
ways:

- **Parallel** (`enb_serial` = 0). `dout` shows the head and `dready` says it
  is valid. The word is taken on a rising clock edge where `get_data` is
  high.
- **Serial.** The word is sent as a 35-bit packet on the 80 MHz clock: a start
  bit (1), 32 data bits MSB first, even parity, and a stop bit (0). Each bit
  lasts `2**readout_speed` periods of the 80 MHz clock, giving 80, 40, 20 or
  10 Mbit/s.
  - With `strobe_select[0] = 0`, the strobe line follows the DS rule: exactly
    one of data and strobe changes per bit.
  - With `strobe_select[0] = 1`, the strobe toggles every bit, like a clock.
  - The 40 MHz and 80 MHz sides hand each word over with a toggle
    handshake.

## Registers, errors, JTAG and self test

`csr` holds 15 control registers (CSR0..14) of 12 bits, laid out bit for bit
as below. A 12-bit bus writes and reads them, or the JTAG CONTROL chain loads
them all at once. CSR16..21 are the status words. On every legal write, a
single parity bit over all 180 control bits is stored. If a bit later flips
without a write, `control_parity` rises.

The nine error flags are sticky and show in CSR16[8:0]. `error_reset` clears
them, and `error` is their OR under the `enb_error` mask:

- coarse counter parity
- channel buffer overflow
- L1 parity
- trigger FIFO parity
- read-out FIFO parity
- L1 overflow
- trigger FIFO overflow
- read-out rejects
- control parity

Several CSR0/CSR10/CSR11/CSR12 bits are stored and readable but control
nothing in this model. Their behaviour is not defined here:

- CSR0: `test_mode`, `test_invert`, `enb_direct`, `clkout_mode`,
  `pll_multi`, `enb_errrst_bcrevr`.
- CSR10/11: `enb_l1occup_readout`, `enb_rejected`, `enb_l1full_reject`,
  `enb_trfull_reject`, `enb_mark_rejected`, `enb_errmark_rejected`, `enb_errmark_ovr`,
  `enb_l1ovr_detect`, `enb_resetcb_sepa`, `enb_mreset_evrst`,
  `enb_setcount_bcrst`.
- CSR12: `enb_sepa_readout`.

`jtag_tap` is a standard 16-state TAP with a 4-bit instruction register:

| IR | register | length |
|---|---|---|
| 0001 | IDCODE `1A710001` | 32 |
| 1000 | CONTROL: all control registers, CSR0 bit 0 nearest TDO | 180 |
| 1001 | STATUS (capture only) | 72 |
| 1010 | BIST: captures {fail[2:0], done[2:0]}; Update-DR with bit 0 set starts the test | 6 |
| 0010 | SAMPLE: the pins, captured at Capture-DR (see below) | 64 |
| 1011 | DEBUG: internal state, captured at Capture-DR (see below) | 42 |
| other | BYPASS | 1 |

From TDO onwards, the SAMPLE register holds:

- `hit[23:0]`;
- `trigger`, `bunch_reset`, `event_reset`, `get_data`;
- `dout[31:0]`;
- `dready`, `serial_data`, `serial_strobe`, `error`.

From TDO onwards, the DEBUG register holds:

- the L1 write pointer (9 bits) and start pointer (9);
- the read-out FIFO occupancy (7) and trigger FIFO occupancy (4);
- the reject counter (12);
- the trigger-matching busy flag.

The boundary cells only observe the pins. They cannot drive them, so there is
no EXTEST.

`mbist` runs March C- (`⇑w0 ⇑r0w1 ⇑r1w0 ⇓r0w1 ⇓r1w0 ⇑r0`) on a memory
through that memory's own port. There are three instances: the L1 buffer and
the two FIFOs. A test takes about 10 cycles per word and leaves the memory
all zeros.

## Clocks and reset

- `clk` is the 40 MHz beam clock. It is the PLL reference and the system
  clock.
- `clk80` and the taps come from the oscillator model.
- Each hit input clocks its own channel buffer.
- `rst_n` resets everything, registers included.
- CSR0 `global_reset` and the master reset code reset everything except the
  registers, through a registered core reset.

In a two-state simulator with random initial values, an asynchronous reset
acts only on a falling edge. The flip-flops clocked by the hit inputs see no
other clock, and they hang off the registered core reset. The system-level
bench therefore pulses `rst_n` twice: the first pulse sets the core reset to
a known state, and the second gives it a falling edge.

## Where this model departs from the original chip, or goes beyond it

The architecture, all sizes and the register map follow the original chip:

- 24 channels, 4-word channel buffers, 256/8/64-word memories;
- 0.78125 ns bins, 13+4-bit times;
- 15 + 6 twelve-bit registers with the field layout listed above;
- the serial packet format and rates;
- parity on memories and control bits;
- JTAG access to registers and memory self test.

The following are choices of this model:

- the tap code and the A/B/B+1 counter selection;
- the asynchronous FIFO design of the channel buffers;
- round-robin arbitration;
- the L1 and read-out word layouts and IDs;
- the exact window semantics of the matching, and the drop/keep rule for old
  hits;
- the reject counter as the auto-reject limit;
- the encoded trigger line codes;
- the nearly-full thresholds (224 of 256, 6 of 8);
- the reset values of the control registers;
- the JTAG instruction codes, chain order and IDCODE;
- March C- as the self-test algorithm.

Not built:

- Boundary cells that drive the pins (EXTEST). Pins can only be sampled.
- The functions of the control bits listed above.
- The LVDS pads. Every LVDS signal is a plain single-ended port.
- The front-end amplifier/discriminator chip. It drives the hit inputs and
  is outside this design.

The channel buffers do not carry a parity bit of their own over the fine
time. The counter values latched with each edge are parity protected.

Capacity, worked out from the sizes above:

- At 400 kHz per channel, the 24 channels give 9.6 M hits/s. The
  controller and encoder take 20–40 M words/s, depending on whether one or
  two words are written per hit.
- Holding hits for the full ±51.2 µs folding range at that rate would need
  about 490 L1 words, against 256. Long latencies at full rate therefore rely
  on automatic reject and prompt triggers.

## Files and simulation

`rtl/amt_pkg.sv` holds the shared types, constants, read-out IDs, the
decoded register struct and the register reset values. Every other file in
`rtl/` holds one block; `amt_top.sv` wires them together. Every block has a
self-checking bench `tb/tb_<block>.sv` that prints
`TB_RESULT checks=N failures=M`.

`tb/tb_amt_top.sv` runs the whole chip at its real sizes. It programs the
registers, drives hits at known picosecond times, sends triggers, and
compares every read-out word with times computed from the pulse times
alone. It goes through:

- leading/trailing words with mask flags;
- pair words with relative times;
- serial DS read-out, decoded from the two lines;
- automatic reject;
- a blocked read-out that fills the read-out FIFO and overflows the trigger
  FIFO;
- JTAG: IDCODE, the control chain, and the self test of all memories.

It counts each of these mechanisms and fails if any never happened.

`tb/tb_amt_rate.sv` is the rate workload. For 40 µs, all 24 channels get
random hits at an average of 400 kHz each, about 400 hits in total. Some of
these are double hits 10 ns apart. Matching is off, so every hit goes
straight to the parallel port. The bench requires every hit to come out
exactly once, with the right time, and with no error flag. In a typical run
the longest delay from an edge to its word on the port is about 0.4 µs.

To run a bench with plain Verilator:

```
verilator --binary --timing --assert -y rtl +libext+.sv -Irtl \
    rtl/amt_pkg.sv tb/tb_amt_top.sv --top-module tb_amt_top -o sim
obj_dir/sim +verilator+rand+reset+2
```

All files use `timescale 1ps/1ps`, which the oscillator model needs. Every
bench finishes within a few seconds of wall time.
