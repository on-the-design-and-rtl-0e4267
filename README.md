# LA-1 Look-Aside Interface slave, in SystemVerilog

A network processor that needs a table lookup, a classification or a crypto
operation hands it "to the side", over a look-aside bus, to a memory or
coprocessor. LA-1 is the de-facto standard for that bus. It is modelled on a
QDR SRAM: reads and writes travel on separate, unidirectional data paths, so a
read and a write can be issued in the same clock cycle; one address bus serves
both; and both data paths are double data rate (DDR), carrying one 36-bit word
(32 data bits plus 4 even byte-parity bits) over 18 pins in two beats.

This RTL is an LA-1 *slave device*: a multi-bank SRAM behind an LA-1 port,
with a built-in protocol monitor. It can be used in two ways:

* as a stand-alone LA-1 memory IP inside a larger chip, or
* as a verification unit: its monitor watches the LA-1 pins and counts
  protocol and parity violations, so it can be placed next to another LA-1
  device to check it.

The default build has four banks, each 64 K words of 36 bits.

## Clocks and the half-cycle protocol

Everything is timed by the master clock pair K and K#, driven by the host.
K# is ideally K inverted, so within one K period there are two rising edges
that matter: K, and K# half a period later. This is the part of the design
that most needs care, because the address bus and the data-in bus carry two
different things in the two halves of each cycle.

Cycle *n* from the host's point of view:

| edge       | sampled by the device                                   |
|------------|---------------------------------------------------------|
| K (n)      | R#, read address on SA, read bank on E; W#; D beat 0 (word bits 17:0) and BW# for lanes 1:0 |
| K# (n)     | write address on SA, write bank on E; D beat 1 (word bits 35:18) and BW# for lanes 3:2 |

Then:

* **write**: the assembled word is stored in the bank's SRAM at K (n+1).
* **read**: the bank's SRAM is read at K (n+1); Q carries beat 0 from
  K (n+2) and beat 1 from K# (n+2). Q_OE is high for the whole of cycle n+2.

So a read has a latency of two cycles, and the device accepts one read and one
write every cycle, in any mix of banks. A read and a write to the same
address in the same cycle return the old word (the SRAM reads before it
writes); a read issued one cycle after a write sees the new word.

A host model must therefore change SA, E and D twice per cycle. The
testbenches set the K-edge values a quarter period before K and the K#-edge
values a quarter period before K#.

### Word layout

A word is four 9-bit lanes, each `{parity, byte}` with even parity (the parity
bit is the XOR of the byte). Lanes 0 and 1 form beat 0, lanes 2 and 3 beat 1.
There are two active-low byte-write pins, BW#[1:0], sampled at both edges, so
each lane has its own write enable. `la1_pkg::make_word()` builds a word with
correct parity from 32 data bits.

## Structure

```
la1_interface  (top, NUM_BANKS banks)
 ├─ la1_bank  x NUM_BANKS      one per bank, BANK_ID = 0 .. NUM_BANKS-1
 │   ├─ la1_write_port         W#/address/data capture, byte enables
 │   ├─ la1_read_port          read pipeline and DDR output
 │   └─ la1_sram               two-port 2^ADDR_WIDTH x 36 array
 ├─ la1_qbus                   shared data-out bus across the banks
 └─ la1_monitor                protocol and parity monitor
la1_pkg                        word/beat types, parity helpers
```

Each bank also carries its read-mode and write-mode rules as assertions:
a read to the bank is answered on Q exactly two cycles later and Q is driven
at no other time; the SRAM is written only on the K edge after W#.

Every bank sees all shared pins (R#, W#, SA, E, D, BW#) and acts only on
commands whose bank select E equals its BANK_ID. A multi-bank device is
nothing more than N copies of the single-bank one, plus the output bus.

### Write port (`la1_write_port`)

Registers W# and beat 0 at K, the address, the bank match and beat 1 at K#,
and presents `{beat1, beat0}`, the four lane enables and the address to the
SRAM, which stores the word at the next K. The registers written at K# are
read at the following K, a half-cycle timing path.

### Read port (`la1_read_port`)

A three-stage pipeline on K: request (R#, address, bank), SRAM read, output.
The output is a DDR stage built from two registers, `lo` clocked by K and `hi`
clocked by K#:

```
K  rising:  lo <= beat0 ^ hi
K# rising:  hi <= beat1 ^ lo
Q = lo ^ hi
```

After K, Q = beat0; after K#, Q = beat1. No clock enters the data path, so the
stage is ordinary synthesizable logic. The K# register reads the K registers
half a cycle after they change, again a half-cycle path. Q is forced to 0
while the bank is not driving.

### Shared output bus (`la1_qbus`)

In a multi-bank LA-1 device the banks' outputs meet on one Q bus, classically
through tristate buffers. Here the bus is the logic equivalent: each bank's Q
is ANDed with its enable and the results are ORed. `bus_oe` (the Q_OE pin) is
the OR of the enables, and `conflict` flags two banks driving at once, the
case where tristate drivers would fight. By construction only the bank
addressed by a read drives, so `conflict` never rises; the top asserts that.

### Monitor (`la1_monitor`)

A synthesizable checker on the pins (R#, W#, E, D, Q, Q_OE, plus the bus
conflict flag). It counts reads and writes and checks:

* **read mode**: every read to an existing bank at K (n) is answered with Q
  driven during cycle n+2, and Q is never driven otherwise. Each cycle in
  which Q_OE disagrees with this counts one latency error, so a read answered
  one cycle late counts two.
* **contention**: cycles with two banks driving.
* **parity**: beats with a lane of odd parity, on D during writes and on Q
  during reads.

`MON_VIOLATION` is high once any error has been counted since reset. A read
to a bank number at or above NUM_BANKS is not counted as a read.

## Parameters

| parameter (top) | default | meaning |
|-----------------|---------|---------|
| `NUM_BANKS`     | 4       | number of banks; 1 to any, not only powers of two |
| `ADDR_WIDTH`    | 16      | SA width; each bank holds 2^ADDR_WIDTH words |
| `CNT_WIDTH`     | 32      | width of the monitor counters |

The bank-select width is `max(1, clog2(NUM_BANKS))`. The 18-pin data paths,
36-bit word and 4 lanes are fixed in `la1_pkg`.

## Reset

`RST_n` is asynchronous and active low. It clears the command and valid
flags of the ports and the monitor's counters. The SRAM contents and the data
registers are not reset: read an address only after writing it.

## Where this design makes its own choices

The LA-1 features, the K/K# clocking, W# at K with the write address at the
following K#, R# and the read address together at K, and the read sequence
(SRAM access one cycle after R#, data released on the next K and K# edges) are
the interface as specified. The following are choices of this implementation
and worth checking against any LA-1 device it has to interoperate with:

* **Write data timing**: both write beats are taken in the same cycle as W#
  (beat 0 at K, beat 1 at K#). A host that sends the data one cycle after W#
  will not work without changing `la1_write_port`.
* **Bank selection**: a separate bank-select bus E that travels with the
  address (at K for reads, at K# for writes). Per-bank select pins would need
  a small change in the ports' bank match.
* **Beat order and lane layout**: beat 0 = bits 17:0 = lanes 1:0.
* **Byte-write pins**: two BW# pins, sampled at both edges.
* **Same-cycle read and write of one address**: the read returns the old word.
* **Address width** of 16 bits and the reset pin.
* **Tristate bus** replaced by an enable-gated OR, with an extra Q_OE output.
* **Parity** is carried and stored, not generated or corrected; only the
  monitor checks it.
* The monitor's rule set; the read-mode rule follows the read sequence above.

Two lint warnings remain and are expected: `RST_n` is used both by the
asynchronous resets and by the `disable iff` of the assertions, and
`la1_pkg` has a constant some modules do not use.

## Verification

Each module has a self-checking testbench in `tb/`; each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_la1_sram`        | random reads and byte-masked writes against a reference array, read-first collisions, hold of rdata |
| `tb_la1_write_port`  | SRAM-side outputs one cycle after W#, beat assembly, lane enables, writes to other banks ignored |
| `tb_la1_read_port`   | SRAM request one edge after R#, beat 0 / beat 1 on the exact K / K# edges two cycles later, Q = 0 when idle |
| `tb_la1_bank`        | one full bank under random concurrent traffic, including other-bank commands |
| `tb_la1_qbus`        | every enable pattern of four banks: data, Q_OE, conflict |
| `tb_la1_monitor`     | correct traffic, then one of each violation, with exact counter values |
| `tb_la1_interface`   | the full-size device (defaults): 3000 cycles of random concurrent traffic on all banks against a reference model, exact two-cycle latency, monitor counts, and a deliberate parity error; it counts full and masked writes, same-cycle read and write, same-address collisions, read right after write, back-to-back reads switching banks and idle cycles, and fails if any never happened |
| `tb_la1_bank_configs`| the 1-, 2-, 3- and 4-bank devices side by side (via the helper `la1_cfg_run`) |

Every testbench was also run against a deliberately broken copy of its module
(beats swapped, byte enables ignored, latency off by one, and so on) and
reported failures.

Running one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --timescale 1ns/1ps rtl/la1_pkg.sv tb/tb_la1_interface.sv \
    --top-module tb_la1_interface
./obj_dir/Vtb_la1_interface
```

Replace the testbench name for the others. The full-size test runs in well
under a second.

What is not covered: the timing of the half-cycle paths (K to K# and K# to K)
has not been analysed, and the design has not been tested against another
vendor's LA-1 model, so the choices listed above are unverified against real
hosts.
