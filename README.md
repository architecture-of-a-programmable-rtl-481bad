# PATGEN — a programmable pattern generator for CCD and focal-plane-array clocking

PATGEN produces the clock and control waveforms that a CCD or focal plane
array needs: eight output pins, each playing back a long, repetitive bit
pattern, one bit per clock. The patterns are far too long to store bit by
bit (up to 2^38 bits per pin), but they are built from a few short pieces
repeated many times. So the chip stores a handful of short *fields* per pin,
and two levels of hardware loop counters expand them into the full waveform.
Everything is loaded at start-up from an external boot PROM, which can serve
several chips at once. The architecture targets a radiation-tolerant SOI
process. To detect upsets it checks parity at run time, and a built-in
self-test mode reuses the same parity logic.

This repository holds synthesizable SystemVerilog for the whole chip. The
pads and the PROM are not included. It also holds self-checking testbenches
for every block and for two chips working together.

## How one pin's pattern is built

Each channel (pin) has:

* **8 fields**. A field holds up to 64 bits and has its own length (1..64)
  and loop count (1..16384).
* **4 groups**. A group lists up to 4 field numbers (fields may repeat) and
  has its own loop count (1..16384).
* A **sequence length** of 1..4 groups.

The pin plays:

```
for g in groups 0 .. seq_len-1:
  repeat group_count[g] times:
    for each of the group's slots s (1..4):
      f = field number in slot s
      repeat field_count[f] times:
        emit field f, bits 0 .. length[f]-1     (bit 0 first)
```

When the last group has finished, the pattern either starts again
(continuous) or the chip stops (single shot). The largest pattern is
64 × 16384 × 4 × 16384 × 4 = 2^38 bits. With no looping at all, a channel
holds 8 × 64 = 512 bits.

Example, one group in mask mode (Z = high impedance):

| field | bits  | length | count | slot |
|-------|-------|--------|-------|------|
| 0     | 00000 | 5      | 1     | 0    |
| 7     | 11011011 | 8   | 2     | 1    |
| 5     | 111   | 3      | 1     | 2    |
| 2     | ZZZZ  | 4      | 3     | 3    |

With the group repeated 3 times, the pin plays
`00000 11011011 11011011 111 ZZZZ ZZZZ ZZZZ`, three times: 108 bits. This
exact case is in `tb_patgen_channel` and `tb_patgen_top`.

## Fields: patterns that rotate in place

`patgen_field` is a 64-bit register whose bit 0 drives the field output.
Each shift moves every bit one place towards bit 0. The bit that leaves
position 0 re-enters at position L-1, where L is the field length. A
one-hot *tap* vector picks L-1 and a *thermometer* vector marks bits
0..L-1. Bits at or above L do not move.

After exactly L shifts the register is back in its loaded state. So a field
can be played any number of times, and used in several groups, with no
second copy of the pattern and no reload. The loop counter is a 14-bit down
counter with a reload register. It stores "iterations − 1", so its zero
flag means "this is the last pass".

`patgen_field_len_ctrl` holds the eight lengths. It decodes only the length
of the currently selected field into the tap and thermometer vectors. These
lines are shared by all eight fields, and only the enabled field(s) shift.

## Sequencer: groups of field numbers

`patgen_sequencer` stores each group as three 4-bit cyclic shift
registers. Register b holds bit b of the four 3-bit field numbers, so
position 0 of the three registers is the current field number. Moving to
the next slot rotates the three registers within the group's length, and a
small step counter says which slot is current. After a whole group pass the
registers are back in their loaded order, like the fields.

Each group also has a 14-bit loop counter with reload. A group counter picks
the active group, and a 4-to-1 multiplexor of 3-bit values outputs the
active group's field number (`sel`).

## The counter cascade (channel controller)

`patgen_channel_ctrl` has two states. In **reset** it holds all loop
counters at their reload values. In **operating** it emits one bit for each
clock in which `run` is high. A bit counter runs from 0 up to the selected
field's length − 1. Every completed field pass steps the counters in this
order:

| condition at the end of a field pass | action |
|---|---|
| field count not zero | decrement the field's counter, play the field again |
| field count zero, slot not last | reload the field's counter, rotate to the next slot |
| last slot, group count not zero | also rotate back to slot 0, decrement the group counter |
| last slot, group count zero, not last group | reload the group counter, go to the next group |
| all of the above, last group | go to group 0: **pattern end** (`pat_end`) |

All these decisions are combinational in the cycle that emits the last bit
of a pass. So the next field starts on the very next clock, with no gaps
between fields, iterations or groups. Every count goes through this same
path, down to a length of 1 and a count of 1.

## Mask mode: three-level outputs

In binary mode the selected field drives the pin, and the pin is always
driven. In mask mode the eight fields work as four pairs. The upper field
of a pair (4..7) gives the high/low value. The lower field (0..3) gives a
tri-state flag, where 1 means high impedance. Field number s reads its value
from field `{1,s[1:0]}` and its flag from field `{0,s[1:0]}`, and both
fields of the pair shift together with field s's length. A mask-mode
pattern therefore uses at most four distinct pairs. The pin value and enable
are registered in `patgen_mux_oe`.

## Boot from the PROM

The chip controller (`patgen_chip_ctrl`) loads the configuration from a
byte-wide PROM after reset, once `begin_init` is high. Tie `begin_init` high
to configure at power-on. The PROM image is:

* byte 0: number of chips − 1;
* chip i: 1024 bytes starting at `1 + 1024*i`, 128 bytes per channel.

Layout of one channel image (all counts and lengths are stored minus one):

| bytes | contents |
|---|---|
| 0..63 | field k in bytes 8k..8k+7, byte j = bits 8j..8j+7 |
| 64..71 | field k length − 1 (bits 5:0) |
| 72..87 | field k loop count − 1: low byte at 72+2k, high 6 bits at 73+2k |
| 88..95 | group g field numbers: byte 88+2g = {slot1, slot0}, 89+2g = {slot3, slot2}, one per nibble (bits 2:0) |
| 96..103 | group g loop count − 1: low byte at 96+2g, high 6 bits at 97+2g |
| 104 | group g length − 1 in bits 2g+1:2g |
| 105 | bits 1:0 groups − 1, bit 2 mask mode, bit 3 parity of the whole pattern's data bits |

With `ms` = 1 the chip is the **master**. It reads byte 0, then drives
addresses 1 .. 1024·nchips on `prom_addr_o` (with `prom_addr_oe` high), one
per clock, and then releases the bus. **Slaves** (`ms` = 0) never drive the
bus. Every chip watches the shared address bus on `prom_addr_i` and copies
the bytes of its own segment, chosen by its `chip_id` pins, into its
channels. The PROM is assumed to answer within the same clock, so a chip
loads in about 1 + 1024·nchips clocks.

## Starting, stopping, chaining

After configuration the chip waits in READY. A rising edge on `pstart`
starts RUN, and every channel then emits a bit each clock. Channel 0 sets
the pattern period. When its pattern ends, `pend` pulses for one clock,
while that last bit is on the pins. If `pen` is high at that moment, the
pattern just continues (continuous mode). If `pen` is low, the chip stops
and the pins hold their last value (single shot). The next `pstart` edge
resumes every channel from where it stopped.

Give all channels the same total length if they must stay in lock-step.
Two channels can also be wired to one pin for a longer pattern, each in
mask mode and tri-stated while the other drives.
Chips side by side share `pstart`/`pen` to get more channels. For longer
patterns, chips can be chained by feeding one chip's `pend` to the next
chip's `pstart`; this leaves one idle clock between them.

Timing: `pstart` is sampled on a clock edge, RUN starts on the next clock,
and the first bit appears on the pins one clock after that.

## Parity, self-test and upset detection

* `patgen_parity` gives the XOR of the eight channel data bits for each new
  output bit.
* **BIST**: if `bist` is high on clock edges while `rst_n` is low, the chip
  enters self-test. The pattern pins are disabled (`pat_oe` = 0), and
  configuration and pattern generation run as usual. Self-test patterns are
  chosen so that the eight channels always have even parity. Any 1 on
  `parity` is then a failure. For example, give channels 2k and 2k+1 the
  same image.
* **Bit error**: `patgen_bit_error` keeps a running parity of each channel's
  data bits over a whole pattern. At the pattern end it compares that parity
  with bit 3 of the channel's mode byte, which the programming software
  computes. A mismatch sets a sticky per-channel flag, and `bit_error` is the
  OR of the flags. Only a reset, which also reloads the patterns, clears it.

## Top-level pins (`patgen_top`)

| pin | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock, asynchronous active-low reset (keep the clock running during reset for BIST sampling) |
| ms | in | 1 | 1 = master |
| bist | in | 1 | self-test request, sampled during reset |
| begin_init | in | 1 | start configuration |
| pstart | in | 1 | start on rising edge |
| pen | in | 1 | 1 = continuous, 0 = single shot |
| chip_id | in | 3 | PROM segment of this chip |
| prom_addr_o / prom_addr_oe | out | 14 / 1 | PROM address driver (master only) |
| prom_addr_i | in | 14 | PROM address bus as seen by the chip |
| prom_data_i | in | 8 | PROM data |
| pat_o / pat_oe | out | 8 / 8 | pin value and driver enable per channel (0 = high impedance) |
| pend | out | 1 | pattern end pulse |
| parity | out | 1 | parity of the pins / BIST fail |
| bit_error | out | 1 | upset detected |
| init_done | out | 1 | configured |

The tri-state pad itself is not in the RTL: drive a pad with `pat_o` when
`pat_oe` is high.

Parameter: `FIELD_W` (default 64). Set it to 32 for 32-bit fields. The
package `patgen_pkg` fixes 8 channels, 8 fields, 14-bit loop counters and 4
groups of 4 slots.

## What follows the architecture and what is this design's own

These follow the architecture: eight channels; eight fields of up to 64
bits, each with a 14-bit loop counter and reload register; fields built as
recirculating shift registers with a length-selected multiplexor; a field
length control that decodes only the active field; a sequencer of four
groups, each with three 4-bit cyclic shift registers, a group length, a
14-bit group loop counter, a group counter and a 4(3:1) multiplexor; a
two-state channel controller; binary and mask output modes; a chip
controller driven by M/S, BIST, Begin_Init, PStart, PEN and PEND; master
and slave configuration from a shared PROM; parity across channels; BIST by
even parity; per-channel bit-error parity ORed to one flag.

These are this design's own choices:

* the PROM image layout, the byte-wide PROM read in one clock, the header
  byte, and the `chip_id` pins that tell a slave where its data lies;
* the "minus one" encoding of every count and length;
* the pairing of field k with field k+4 in mask mode, and a flag of 1
  meaning high impedance;
* holding bits above the active length still in a field;
* an up-counting bit counter compared with the length;
* channel 0 setting the pattern end; `pstart` acting on its rising edge;
  `pen` read at each pattern end; the pins holding their value when stopped;
* one register stage on the pin outputs;
* where the stored bit-error parity bit sits in the image;
* parity computed from data bits even while a pin is tri-stated.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| tb_patgen_field | rotation for random lengths, content restored after whole passes, loop counter load/decrement/zero/reload |
| tb_patgen_field_len_ctrl | length, tap and thermometer decode for every field |
| tb_patgen_sequencer | field-number order and status flags over two full sequences, random groups |
| tb_patgen_channel_ctrl | every strobe against a model of the cascade, random status |
| tb_patgen_mux_oe | binary and mask selection, registered pins, hold, field enables |
| tb_patgen_channel | the example above, the longest unlooped pattern (8 × 64 = 512 bits), plus random images, binary and mask, with `run` pauses, bit by bit against a reference model (`patgen_tb_pkg`) |
| tb_patgen_chip_ctrl | master address walk, master and slave segment writes, start, continuous, single shot, BIST latch |
| tb_patgen_proto | one chip with 32-bit fields (`FIELD_W = 32`), continuous then single shot, every pin against the model |
| tb_patgen_parity, tb_patgen_bit_error | against direct models |
| tb_patgen_top | two full-size chips (master + slave) on one PROM: every pin, every clock, against the model; PEND timing; parity; a deliberate wrong stored parity raises `bit_error`; 16384-iteration counters run out; BIST pass and a corrupted-image fail. It counts each mechanism (field loop, group loop, group chaining, tri-state, continuous, single shot, bit error, slave load, BIST pass/fail) and fails if any never happens. |

Run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/patgen_pkg.sv tb/patgen_tb_pkg.sv \
          tb/tb_patgen_top.sv --top-module tb_patgen_top
./obj_dir/Vtb_patgen_top
```

For a testbench without the `patgen_tb_pkg` import, leave out
`tb/patgen_tb_pkg.sv`. `tb_patgen_top` runs the chip at its default sizes
and takes well under a minute.

How far to trust it: every behaviour in the tables above is checked cycle by
cycle against an independent model. The reference model follows the same
reading of the architecture as the RTL, so any choice listed in the
previous section is checked for consistency, not against silicon. A full
2^38-bit pattern was not simulated. The largest loop counts simulated were
a field count of 16384 (with a group count of 2) and a group count of 16384.
