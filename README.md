# Front-end FPGA to GBT link: calorimeter data compression

A calorimeter front-end card digitises 32 channels with 12-bit ADCs at every
bunch crossing (40 MHz, 25 ns). The card uses four FPGAs of 8 channels each,
and each FPGA drives one GBT optical link. A GBT link carries 80 user bits per
crossing. Without compression, 8 channels need 96 bits of ADC data, plus the
crossing number and the trigger bits. That does not fit in 80 bits.

The fix uses a simple fact: nearly every sample sits close to the pedestal
(about 256 counts).

- A sample inside a narrow window around the pedestal is a **short** value.
  It is sent as a 5-bit code.
- Any other sample is a **long** value. A map bit is set for its channel and
  one extra byte is sent for it.

Events with many long values are rare, so their bytes can be spread over the
crossings that follow. The RTL gives two ways of doing that. They are
alternatives for the same card.

- **Fixed format scheme** (80 MHz clock). Each crossing yields one 80-bit
  line: 64 bits in a fixed layout, plus two "long data" byte slots. The long
  bytes queue up and fill those slots in order, so a byte may leave with a
  later line. Over a group of 256 crossings, up to 512 long values fit.
- **Sequential scheme** (160 MHz clock). Each crossing yields a 16-byte event.
  Groups of 256 events are packed into a byte stream without the unused long
  bytes, then sent at 10 bytes per crossing. The link output is about 20.6 µs
  behind the input.

`fe_card_top` holds both schemes for all four FPGAs, side by side. Each scheme
has its own clock, reset and inputs, and brings out its own link words.

## Sample coding (`adc_encoder`)

| ADC value `v`          | map bit | 5-bit short field | long byte  |
|------------------------|---------|-------------------|------------|
| 240 ≤ v < 272          | 0       | v − 240           | 0          |
| otherwise              | 1       | v[3:0]            | v[11:4]    |

The 12 bits of a long sample are split: the low nibble goes in its unused
short field and the top byte in the long slot. The receiver rebuilds every
sample exactly. The window [240, 272) is centred on a pedestal of about 256.
It is a parameter (`SHORT_BASE`, `SHORT_BITS` in `fe_pkg`). A 4-bit window
[248, 264) is the other obvious choice.

## Fixed format scheme

### Line layout (`fe_pkg::gbt_word_t`)

| bits    | field        | meaning                                                     |
|---------|--------------|-------------------------------------------------------------|
| 79      | address bit  | one bit of the 11-bit address {crate 5, card 4, FPGA 2}, MSB first, restarting at line 0 of every group |
| 78      | data quality | 1 from the first line whose long values no longer fit, to the end of the group |
| 77:72   | trigger      | this FPGA's 6-bit slice of the trigger result               |
| 71:64   | BXID         | low 8 bits of the crossing number                           |
| 63:24   | short data   | 8 × 5 bits, channel 0 in bits 28:24                         |
| 23:16   | map          | bit *i* = channel *i* is long                               |
| 15:8    | long 0       | next long byte in the queue, or 0                            |
| 7:0     | long 1       | the one after, or 0                                          |

### Groups and the two RAM systems

Lines are stored in groups of 256. Two identical `ram_system`s take turns:
one fills with group *g* while the other sends group *g−1*. A system holds:

- `dp_ram`: the 64-bit fixed part, 256 deep;
- `long_data_ram`: the 8 long bytes of each line, written 64 bits wide and
  read one byte at a time at address {line, channel};
- `pointer_builder` and `sync_fifo`: the long-byte queue (described next).

`gbt_readout` reads the fixed part of one line per crossing from the system
that is not filling. It pops up to two pointers and puts the bytes they
address into the two long slots.

### The pointer FIFO: the part to understand

Storing the long bytes is easy. The hard part is sending them in order
without reading the whole map first. `pointer_builder` scans the stored maps
at 80 MHz, two cycles per crossing:

- a line with *n* long values takes max(2, *n*) cycles;
- each set bit pushes an 11-bit pointer {line, channel} into a 512-deep FIFO;
- the scan starts when line 0 of the group is written and never overtakes the
  line being written.

The worst case is 192 lines with no long value followed by 64 full lines. The
scan then ends after 192 + 256 = 448 crossings. Readout of the group starts
256 crossings after its line 0 and needs its last pointers at crossing 512.

Readout never finds the queue empty while pointers are still to come. While
the scanner is behind the line being written, it produces at least one
pointer per cycle on a line with long values. The readout only pops two per
crossing. `gbt_readout` also checks this: `starve` is raised if a pointer
arrives for a group after one of that group's slots was sent empty. No test
pattern raises it.

### Overflow

A group can carry 2 × 256 = 512 long bytes. `line_builder` keeps a running
count. The first line whose long values would push the total above 512 is
marked bad, and so is every later line of the group:

- data quality is set to 1;
- the long bytes are not queued (their map is scanned as 0);
- the map and the low nibbles are still sent.

Exactly 512 long values still fit. The count restarts with each group.

### Timing

- One crossing is two 80 MHz cycles. `bx_strobe` marks the cycle on which the
  inputs are taken.
- A line's word leaves 517 cycles (256 crossings + 5 cycles) after its inputs
  were taken. `gbt_valid` pulses once per crossing with each word.
- The four fixed links of the card share their timing, so their words stay
  aligned crossing by crossing.
- Nothing is sent until the first group has been stored.

## Sequential scheme

### Event

Bytes 0 to 7 are the fixed bytes:

| byte | content                                         |
|------|-------------------------------------------------|
| 0    | {2'b00, trigger[5:0]}                           |
| 1    | BXID[7:0]                                       |
| 2    | map                                             |
| 3–7  | 40 short bits, channel 7's code first           |

Bytes 8 to 15 are the long bytes of channels 0 to 7.

### Four systems in rotation

Group *g* of 256 events goes to `seq_system` number *g* mod 4. Each system
has its own parts:

- `seq_ram1` (128 bits × 256): written one event per crossing, read one byte
  per cycle.
- `seq_transfer`: starts with event 0 and walks all 4096 bytes, one per
  160 MHz cycle (25.6 µs, the time of one full rotation). It copies every
  fixed byte, and every long byte whose map bit is set, into `seq_ram2`. The
  destination is a row/column counter over 512 rows of 5 bytes.
  - An (almost) empty group gives 2048 bytes; the capacity is 2560.
  - Bytes beyond 2560 are dropped, and the system's `overflow` bit is set.
- Readout begins 824 crossings after event 0 (`RD_START`). It reads two rows
  (10 bytes) per crossing for 256 crossings. Each row is cleared right after
  it is read, so rows the next group does not reach go out as zeros.
  - 824 is the smallest safe delay plus a margin: the 2048 fixed bytes
    arrive at 2 bytes per crossing (8 bytes out of 16 per 4 cycles) and leave
    at 10. The reader would catch up after 256 × 8 × (1/2 − 1/10) = 819.2
    crossings.

The four readout windows follow each other without a gap. After the first
group the link carries one word per crossing. Word *k* of a group leaves
3301 cycles (824 crossings + 5 cycles) after crossing *k* of that group.

The receiver unpacks a group by walking the bytes. Each event is 8 fixed
bytes, followed by one long byte per set map bit.

## Where this design departs from or adds to the scheme

- **Overflow limit.** The scheme says both "fewer than 512 long values" and
  "overflow when 512 are reached". This RTL lets exactly 512 through.
- **Short window.** The window is 5 bits wide. Long samples also send their
  low nibble, so nothing is lost.
- **Long-byte skip rule.** In the sequential scheme, long bytes are skipped
  by map bit, not by testing for a zero byte. A long sample below 16 has a
  zero top byte, and a zero test would lose it.
- **Zeros in RAM2.** These come from clearing on read, not from a separate
  clearing pass.
- **Memory count.**
  - Fixed scheme: the 11-bit pointers and a separate register array for the
    maps make one system about 10 blocks of 4 Kbit, against the 9 planned.
  - Sequential scheme: the RAM1 and RAM2 sizes match the plan (4 × 13 blocks).
- **Not built.**
  - The header/trailer word suggested as a variant of the sequential scheme.
  - Skipping crossings known to be empty. That needs the machine's bunch
    filling scheme.
  - The trigger FPGA, the ADCs and the GBT chip. Their signals are ports.
  - The 6-block test RAM (256 × 96 bits) set aside in the memory count. Only
    its size is known, not how it is loaded or switched into the data path.
- **Address field.** 11 bits {crate 5, card 4, FPGA 2}. The FPGA field width
  is chosen here.

## Files

`rtl/` holds one module or package per file:

- `fe_pkg`, `seq_pkg`: constants and word layouts.
- Fixed scheme, leaves first: `adc_encoder`, `dp_ram`, `long_data_ram`,
  `sync_fifo`, `pointer_builder`, `line_builder`, `ram_system`,
  `gbt_readout`, `fe_fpga_fixed`.
- Sequential scheme: `seq_event_builder`, `seq_ram1`, `seq_ram2`,
  `seq_transfer`, `seq_system`, `fe_fpga_seq`.
- Top: `fe_card_top`.

`tb/` holds one self-checking testbench `tb_<module>` per module. Three
packages support them:

- `fe_ref_pkg`: a reference model of the fixed-scheme link, with a decoder
  that rebuilds the 12-bit samples;
- `seq_ref_pkg`: a reference model of the sequential scheme;
- `fe_stim_pkg`: sample patterns (pedestal, quiet, busy, the worst case,
  flood, window edges).

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog if it hangs. The test patterns exercise:

- overflow, and both RAM systems;
- the worst-case 192 + 64 pattern;
- empty long slots;
- all four sequential systems, and long bytes being skipped.

`tb_fe_card_top` runs the whole card at its default sizes. It compares all
eight links against the models and checks both latencies. It counts how
often each mechanism occurs, and counts a failure for any that never
happens.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
  rtl/fe_pkg.sv rtl/seq_pkg.sv tb/fe_stim_pkg.sv tb/fe_ref_pkg.sv tb/seq_ref_pkg.sv \
  tb/tb_fe_card_top.sv --top tb_fe_card_top
./obj_dir/Vtb_fe_card_top
```

For a single block, replace the testbench and `--top`. The remaining RTL
files are found through `-Irtl`.

To change sizes, edit the constants in `fe_pkg` and `seq_pkg`, or the module
parameters. Keep these relations in mind:

- `MAX_LONG` should be 2 × `LINES`;
- the pointer FIFO depth must be at least `MAX_LONG`;
- `RD_START` must be at least `EVENTS` × `FIX_BYTES` × (1/2 − 1/10), plus a
  few crossings.
