# Spark chamber data acquisition with capacitor-diode wire memories

This is synthesizable SystemVerilog for the data-acquisition electronics of a large
spark-chamber spectrometer. The spectrometer has 20 wire planes and 30,464 readout wires.
Each wire ends on a small capacitor. A spark charges the capacitor, and a diode network
reads it back later. Nothing in the storage reacts to a magnetic field, and any number of
sparks per plane can be held.

The logic turns the 30,464 stored bits into a compact event record in the memory of a
PDP-9 computer. It reads the wires 32 at a time. Empty groups are skipped, and every run
of adjacent hit wires becomes one 18-bit word giving its position and width. The
counter electronics (scalers, ADCs, time of flight) follow, with zero suppression. The
record ends with its own length, and an interrupt tells the program it is ready. A
256-channel control device lets the program set photomultiplier voltages and levels, read
a voltmeter, and start the chamber self tests.

The design runs from one clock. All timing is given in cycles of a 2.5 MHz clock, the
rate at which the original shift register ran.

## The event record

Every word in the record is 18 bits. The most significant bit tells the two kinds apart:

| kind | bits |
|---|---|
| plane ID | `1`, 12 zeros, plane number `[4:0]` (1..20) |
| spark | `0`, board word `[6:0]`, wire `[4:0]`, width `[4:0]` |
| module data | the module's 18-bit value, only if non-zero |

The record sits in PDP-9 memory. Octal address 1000 holds the number of words that
follow it, and the words themselves start at octal 1001. The order is: for each plane,
its ID word and then its spark words in wire order; after the last plane, the non-zero
module words in address order.

The *board word* is the 7-bit board address counter. Its upper six bits select one of
up to 64 readout cards in the plane. Its lowest bit selects that card's EVEN word
(wires 0–31 of the card) or its ODD word (wires 32–63). So consecutive board words are
consecutive groups of 32 wires. The centre of a spark, in wire spacings (1 mm) from the
start of the plane, is

    32 * board_word + wire - (width - 1) / 2

with `wire` counted from 1 within the group (see below).

## Encoding a 32-wire word (`spark_formatter`)

This is the part that needs the most care. The scan controller loads the 32 sense bits
into a shift register. If all 32 bits are zero, the formatter reports `done` two cycles
later and the scan moves on.

Otherwise the register shifts right by one bit per clock, bit 0 first. Two 5-bit counters
run while it shifts:

* **wire** counts the bit positions shifted so far. When a spark is reported, it holds
  the 1-based position of the spark's *last* wire, modulo 32.
* **width** counts the adjacent set bits of the current spark, modulo 32.

A spark ends at the first clear bit after some set bits, or when no set bit remains in
the register. The word `{0, board_word, wire, width}` is then offered on a valid/ready
handshake. After each spark the formatter checks whether any set bit is left. If none is,
it finishes without shifting out the empty tail. If some are, it carries on to the next
spark in the same word.

The counters wrap on purpose, because the chamber self test depends on it. A fully
charged word (32 ones) reports `wire = 0, width = 0`. A missing bit at position *k*
splits that word into two sparks, and the first one ends exactly at *k*. So every word of
a healthy plane in the test encodes as zero, and every failing wire shows up directly in
the record.

Cost: with the output always ready, a non-empty word takes (position of the last set
bit + 1) shift cycles, plus one cycle per spark, plus 2. A spark running across the
boundary between two 32-wire groups is reported as two sparks.

## Reading the chambers (`cd_readout_board`, `sense_cable`, `chamber_scan_controller`)

**Readout card.** A card holds 64 storage elements, modelled as one flip-flop per wire.
A spark pulse on the wire sets the element, and CLEAR empties it. The card compares the
shared 6-bit address bus with its own number. When they match, READ EVEN or READ ODD puts
the 32 bits of that word on the card's sense outputs. Reading does not discharge an
element.

A drive pulse charges the elements it drives, provided it lasts `TEST_CHARGE_CYCLES`
(38 cycles, about 15 µs). A normal 3-cycle READ is far too short to do this. A plane-wide
TEST line drives both words of every card in the plane, which is how the test for '1'
charges a whole plane.

**Sense cables.** Sense bits of equal weight from all cards of four planes are ORed onto
one 32-conductor cable. The five cables are then ORed into the formatter's input. This
works because only the plane being read can drive anything.

**Scan.** The controller holds the plane counter (1..20) and the board word counter.
For each plane it sends the plane ID word. Then, for each board word, it:

1. puts the board address on the bus and waits `SETTLE_CYCLES` (8 cycles);
2. pulses READ EVEN or READ ODD for `READ_CYCLES` (3 cycles), with the formatter loading
   the sense lines in the last of them;
3. passes the formatter's words through until the formatter is done.

The plane ends when the board word counter reaches twice the plane's board count. After
the last plane, CLEAR is held for 3 cycles and END-OF-CHAMBER pulses. An empty word costs
13 cycles, so the whole empty chamber (952 words) takes 12,400 cycles, or 4.96 ms.

The number of boards in each plane comes from `daq_pkg::PLANE_BOARDS`:

| planes | 1–8 | 9–10 | 11, 13, 15, 17 | 12, 14, 16, 18 | 19–20 |
|---|---|---|---|---|---|
| chamber | upstream x/y, 1.2 × 1.2 m | upstream u/v, 1.5 × 1.5 m | downstream x, 1.2 × 2.4 m | downstream y | downstream u/v, 1.8 × 2.4 m |
| boards | 18 | 22 | 36 | 18 | 36 |

That makes 476 boards. The plane order and the 22-board u/v planes are derived from the
chamber sizes and that total. Override `BOARDS` to model a smaller chamber.

## Counter electronics (`chassis_controller`, `counter_scan_controller`)

END-OF-CHAMBER starts a 9-bit address counter that runs through 512 positions:
32 chassis of 16 modules each. Bits `[8:4]` select the chassis, compared with the switches
on its control module. Bits `[3:0]` are decoded on that module into 16 select lines, and
the module's data buses are ORed onto the chassis output.

For each address, the controller waits 2 cycles and then examines the bus. A non-zero
word goes to the DMA, and a zero word is skipped. After the last address, END-OF-EVENT
pulses. Each non-zero module yields exactly one word, its raw data. Modules must carry any
identification inside that word.

## DMA and the computer (`dma_channel`, `event_controller`)

The DMA channel starts its address register at octal 1001 and writes one word per
request. It holds `mem_req` until `mem_ack`. At END-OF-EVENT it writes the word count to
octal 1000.

If a word would land beyond `DMA_LAST` (octal 7777, so 3583 words), OVERFLOW is raised.
That word and any later ones are dropped.

The event controller runs one readout cycle:

1. EVENT arrives from the fast trigger logic. `inhibit` rises, the 18-bit run number
   steps, and the DMA is preset.
2. The chamber scan runs, then the counter scan.
3. The word count is written.
4. `api_req` is raised. It stays high, and `inhibit` with it, until the program
   acknowledges with `api_ack` that it has copied the block away. EVENT pulses that arrive
   during the cycle are ignored.

On OVERFLOW, both scans are aborted at once. The capacitors are still cleared, and the
formatter is flushed. The count of words actually stored is written, and the API request
carries `api_overflow`.

There are two self tests:

* **Test for '0'**: SIMULATE EVENT starts a readout cycle with no spark. Every element
  should be empty, so the record holds only the 20 plane ID words and the module words.
  Any spark word points to a faulty element, cable or comparator.
* **Test for '1'**: the TEST line of one plane is driven for 38 cycles. The controller
  then waits `test_delay × 875` cycles (0.35 ms steps, up to 22 ms) and runs a normal
  readout cycle. That plane's words should all encode as zero.

Test cycles also step the run number.

## Control device (`peripheral_device`)

The device takes one 18-bit command word at a time:

| bits | field |
|---|---|
| `[17:10]` | channel 0–255 |
| `[9:4]` | 6-bit data, function or sub-address |
| `[3]` | DATA ON |
| `[2]` | DATA OFF |
| `[1]` | DVM ON |
| `[0]` | DVM OFF |

The channel and data are latched and decoded to a one-hot `ch_select`. A cycle later,
DATA ON or DATA OFF follows as a 3-cycle pulse. For every channel, the device keeps the
level last switched by DATA ON or OFF (`ch_level`). It also keeps the data last set with
DATA ON (`ch_value`), for example a photomultiplier voltage in 15 V steps.

DVM ON connects the voltmeter to the addressed channel until DVM OFF. While it is
connected, `rd_data` returns the meter's reading. A command that arrives during a pulse is
refused through `cmd_ready`.

In `daq_top`, three channels start the chamber self tests, on the rising edge of DATA ON:

| channel | action |
|---|---|
| 250 | SIMULATE EVENT |
| 251 | test for '1' on the plane in data `[4:0]` |
| 252 | sets the test delay from its stored data |
| 253 | its level is the third input of the time-of-flight majority unit |

## Time-of-flight checkout (`majority_logic`)

The time-of-flight electronics are checked with a test pulse sent down two delay paths
(`tof_path[1:0]`) into a 3-input majority unit set to a 2-fold coincidence. Its third
input is the level of control channel 253. With that level high, a pulse on either path
alone gives `tof_coinc`. With it low, both paths must coincide. This is how the program
chooses between the two paths. The unit is combinational, so pulse widths and the
resolving time of a real coincidence unit are not modelled.

## What is modelled and what is not

Not modelled:

* **Analog parts.** The capacitor-diode analog behaviour, the comparators on the sense
  lines, the high-voltage pulsers, the photomultiplier supplies and the LED pulser are
  outside the RTL.
* **Fast trigger logic.** It appears only as the `event_in` input.
* **PDP-9.** It appears as a memory port, an interrupt request/acknowledge pair and a
  command port.
* **Data modules.** They appear as select and data ports.

The chamber scan, formatter, DMA and counter scan carry assertions on their handshakes: a
word offered and not yet taken stays unchanged, a memory request is held until
acknowledged, and READ EVEN and READ ODD are never both high. Verilator checks them with
`--assert`.

The following are choices made where the original description is silent. Each module's
header comment lists its own.

* **Timing lengths:** the 8-cycle address settle, 2-cycle module settle, 3-cycle
  CLEAR and 3-cycle control pulses. The settle length was chosen so that the chamber scan
  takes the expected 5 ms.
* **Field layouts:** the EVEN/ODD bit as the lowest bit of the board word, the
  position of the plane number in the ID word, and the bit layout of the control word.
* **DMA:** the upper end of the DMA block, and what happens on overflow.
* **Sequencing:** when the capacitors are cleared (after every readout), the
  plane-wide TEST line, and the self-test channel numbers.

## Simulating

Each module `rtl/X.sv` has a self-checking testbench `tb/tb_X.sv`. Each testbench ends by
printing `TB_RESULT checks=N failures=M`. `tb/pdp9_memory.sv` is a behavioural memory with
random acknowledge latency, used by the DMA and top-level tests. For example:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        --top-module tb_daq_top rtl/daq_pkg.sv tb/tb_daq_top.sv
    ./obj_dir/Vtb_daq_top

The top-level tests are:

* **`tb_daq_top`** uses a reduced chamber of 1 to 3 boards per plane and a 400-word
  block. It runs random events, an event offered during the inhibit, a voltage setting
  and voltmeter read, SIMULATE EVENT, the test for '1' and an overflow. It checks the
  complete record each time and counts each mechanism.
* **`tb_daq_top_full`** runs everything at full size: 476 boards and all defaults. It
  reads one event with eight 2–3-wire sparks on every plane, which takes 6.9 ms from
  EVENT to the interrupt request. It then runs the test for '1' on plane 19, one of the
  two largest planes (72 words), with 210 modules loaded, which takes 7.0 ms from the
  command. It takes about a minute to build and finishes in well under a second.

To change the chamber, override `BOARDS` on `daq_top` with a `daq_pkg::board_table_t`
value (index 0 is plane 1). The top's spark input stays 20 × 2304 bits wide either way.
