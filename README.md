# TTP firmware: a portable trigger and readout platform for VFAT hybrids

VFAT is a 128-channel front-end chip for silicon and gas detectors. For every
level-1 trigger (LV1A) it sends a 192-bit packet carrying its chip ID, its own
event count (EC), its own bunch-crossing count (BC), the 128 hit bits and a
checksum. Testing a production hybrid means sending it fast commands with
exact timing, collecting its packets, and checking that its counters stay in
step with the tester's counters.

This RTL is the FPGA firmware of such a tester, the TOTEM Test Platform (TTP).
The TTP is a small board with a USB link to a laptop. Its job, in one sentence:
**play a programmable pattern of fast commands into the hybrids, keep its own
copy of the event and bunch numbers, and buffer the returned packets for the
host**. Everything is reached over a byte-wide FT245 USB FIFO chip.

The firmware has four parts, all on one 40 MHz clock:

| part | modules | what it does |
|---|---|---|
| triggering | `pattern_generator`, `pattern_ram`, `trigger_ctrl`, `t1_encoder`, `ec_bc_counter`, two `sync_fifo` | makes trigger bursts, encodes the four fast commands on one serial line, records EC/BC of every LV1A |
| readout | `readout_subsystem` (four `vfat_deserializer` + four `sync_fifo`), `sbit_recorder` | cuts the serial packets into 16-bit words, buffers 85 packets per channel, logs fast-OR activity |
| front-end control | `doh_reset`; the FEC core is external (ports `fec_*`) | resets the CCUM i2c-master hybrid; passes host accesses to the FEC core |
| local control | `ft245_if`, `ttp_regs` | USB byte protocol, memory space of pattern RAM and registers |

`ttp_top` wires them together. `ttp_pkg` holds the shared types, the command
codes and the register map.

## Fast commands on one wire

The four fast ("T1") commands share a single line to all hybrids. Each command
is 3 bits, sent one bit per clock: a `1` start bit, then a 2-bit code. The line
idles at `0`.

| command | meaning | priority | pattern on the line |
|---|---|---|---|
| Resynch | resets the front-end counters | 1 (highest) | `1 1 0` |
| BC0 | bunch crossing zero | 2 | `1 0 1` |
| CalPulse | fire the on-chip test-charge injector | 3 | `1 1 1` |
| LV1A | level-1 accept: read out an event | 4 (lowest) | `1 0 0` |

Patterns and priorities are the published ones. `t1_encoder` keeps one
pending flag per command. When the line is free, it sends the highest-priority
pending command. The start bit appears one clock after the request, and
commands can follow back to back, one every 3 clocks. A request that finds its
own command still pending is lost. It is reported on `lost`, and the host sees
the count in register `LOST_CMDS`. The queue and the loss rule are this
design's choices.

Because the line carries at most one command per 3 clocks, no two triggers
can be closer than 3 clocks. This is why the pattern generator's shortest
interval is 3.

## Trigger bursts from a RAM

A burst of N one-clock pulses is described by N intervals T1..TN. T1 runs from
the start to the first pulse, and Tk runs from pulse k-1 to pulse k. The
intervals are stored in the 1024 x 32-bit pattern RAM, which is the memory
space from 0x000 to 0x3FF. `pattern_generator` is built from three parts,
following the published structure:

```
 address counter --> pattern RAM --> down counter --> pulse
        ^                                   |
        +------------ advance --------------+
```

When the down counter expires, it emits a pulse, loads the next interval and
advances the address. The timing, as built:

- `start` at clock edge *s* gives the first pulse at edge *s + 2 + T1*. One
  clock fetches T1 from the synchronous RAM, and one clock registers the pulse.
- After that, pulse *k* comes exactly *Tk* clocks after pulse *k-1*.
- A stored 0 means 2^32 clocks. Stored 1 and 2 are raised to 3.
- `BURST_LEN` sets the number of pulses (1..1024; 0 means 1024).
- In loop mode the burst restarts from word 0 with no gap, until `stop`.

`trigger_ctrl` decides what a pulse becomes. It takes one of three sources:
the pattern generator, an external input, or the TTCrm L1 accept. The
external input is synchronised and edge-detected, which adds 2 clocks. Each
trigger is then turned into commands by one of three modes:

- `MODE_LV1A`: the trigger sends an LV1A.
- `MODE_CALPULSE`: the trigger sends a CalPulse.
- `MODE_CAL_LV1A`: the trigger sends a CalPulse, then an LV1A `CAL_LAT`
  clocks later (1..256). This is the usual way to read out an injected charge
  in pulse scans and binary scans.

Single commands of any of the four kinds can also be fired from the host. The
three sources follow the published design. The published design mentions
"triggering modes" but does not list them, so these three modes are this
design's own.

## Keeping count: EC and BC

`ec_bc_counter` mirrors the counters inside every VFAT, so the host can check
synchronisation packet by packet:

- BC (12 bit) advances every clock, returns to 0 on BC0, and wraps at 4096.
- EC (8 bit) advances on every LV1A.
- Resynch clears both.
- For each LV1A, the EC it is given (the first LV1A after Resynch gets 0) and
  the BC of the clock its start bit went out are pushed into two 256-word
  FIFOs. The widths and depths follow the published design.

The counters are driven by the commands as `t1_encoder` actually transmits
them. They are not driven by the requests. So a queued or lost request never
makes the local counts drift from what the chips saw. A real VFAT adds a
fixed latency of its own to BC. The host compares BC values modulo that
constant offset.

## Readout: from a serial line to 16-bit words

Packet layout (MSB first on the wire, one bit per 40 MHz clock):

| word | bits 15:12 | bits 11:0 |
|---|---|---|
| 0 | `1010` | BC[11:0] |
| 1 | `1100` | EC[7:0], Flags[3:0] |
| 2 | `1110` | ChipID[11:0] |
| 3-10 | channel data [127:0] | |
| 11 | CRC-16 | |

`vfat_deserializer` assumes the line idles at `0`, so the first `1` is the
first bit of a packet. It then shifts in 192 bits and writes each 16-bit word
to the channel FIFO one clock after the word's last bit. It also checks the
three header nibbles. A packet with a bad header is still stored, and the
error is counted (`HDR_ERR`, one byte per channel). The CRC is stored but not
checked, because the VFAT CRC definition is not part of this design.

Each channel FIFO is 1024 x 16 bits, which holds 85 whole packets
(85 x 12 = 1020 words). Room for a whole packet is checked at its first bit.
A packet that does not fit is dropped whole and counted (`DROPPED`), so the
FIFO never holds a partial packet. `readout_subsystem` has four channels. Its
input selector chooses either the four VFATs of the Roman Pot hybrid or the
four single-VFAT GEM hybrids (`CONTROL[5]`).

`sbit_recorder` watches the four selected fast-OR (s-bit) lines. On any
rising edge it stores `{s-bits[3:0], BC[11:0]}` in a 256-word FIFO. The
published design only names an "s-bit & timestamp" block, so this format is
this design's own.

## Host access

### Byte protocol over the FT245

`ft245_if` drives the FT245's RD#/WR/RXF#/TXE# pins. Strobes are 3 clocks
(75 ns) long, with a 4-clock recovery between bytes. The flags pass through
two-flop synchronisers. The firmware decodes the byte stream as follows:

```
byte 0      {write, fec, no_incr, 5'b0}
byte 1..2   word address, MSB first
byte 3..4   word count - 1, MSB first       (1..65536 words)
write:      4 bytes per 32-bit word follow, MSB first
read:       the board answers 4 bytes per word, MSB first
```

The address advances after each word, unless `no_incr` is set. That flag is
how a FIFO register is drained in one burst. With `fec` set, the transaction
goes to the FEC-core port instead of the memory space. A read that gets no
answer within 256 clocks returns `0xFFFFFFFF`. The platform needs single and
burst reads and writes, which the published design requires. The byte format
itself is this design's own.

### Memory space (32-bit words)

| address | name | access | content |
|---|---|---|---|
| 0x000-0x3FF | pattern RAM | RW | trigger intervals T1..T1024 |
| 0x400 | CONTROL | RW | [1:0] mode, [3:2] source (0 internal, 1 external, 2 TTC), [4] loop, [5] GEM readout |
| 0x401 | BURST_LEN | RW | pulses per burst |
| 0x402 | CAL_LAT | RW | CalPulse to LV1A latency |
| 0x403 | COMMAND | W | one-clock strobes: [0] start, [1] stop, [2] LV1A, [3] CalPulse, [4] BC0, [5] Resynch, [6] clear the FIFOs and the lost-command, lost-event and lost-s-bit counters, [7] CCUM reset |
| 0x404 | STATUS | R | [0] burst running, [1] EC FIFO empty, [2] BC FIFO empty, [3] s-bit FIFO empty, [4] T1 line busy, [11:8] readout FIFOs empty |
| 0x405 | PULSES | R | pulses sent in the current burst |
| 0x406 / 0x407 | EC_FIFO / BC_FIFO | R, pops | [31] empty, EC or BC value |
| 0x408-0x40B | RO_DATA0..3 | R, pops | [31] empty, [15:0] packet word |
| 0x40C-0x40F | RO_COUNT0..3 | R | readout FIFO fill in words |
| 0x410 | SBIT_FIFO | R, pops | [31] empty, {s-bits, BC} |
| 0x411 | LOST_CMDS | R | T1 requests lost |
| 0x412 / 0x413 | DROPPED / HDR_ERR | R | one byte per channel |
| 0x414 | DOH_LEN | RW | CCUM reset length in clocks |
| 0x415 | SCRATCH | RW | free |
| 0x416 | EVT_FILL | R | [8:0] EC/BC FIFO fill, [23:16] events not recorded because the FIFOs were full |
| 0x417 | SBIT_STAT | R | [8:0] s-bit FIFO fill, [23:16] s-bit records lost |
| 0x418 | PKT_CNT | R | packets stored, one byte per channel (wraps) |
| 0x419 | COUNTERS | R | live counters: [7:0] EC, [27:16] BC |

The RAM and register windows follow the published address map. The register
list is this design's own. Reads return one clock after the request, for RAM
and registers alike. Addresses 0x500 and above are unmapped.

### A typical test cycle

1. Write Resynch and BC0 to COMMAND.
2. Load the intervals into 0x000.
3. Set CONTROL, BURST_LEN and CAL_LAT, then write start.
4. Poll STATUS[0] until the burst ends.
5. Drain EC_FIFO, BC_FIFO and RO_DATA*n* with no-increment burst reads.
6. Compare EC/BC with words 0 and 1 of each packet.

Bursts longer than 85 LV1A overflow the packet FIFOs. Bursts longer than 256
LV1A overflow the EC/BC FIFOs, unless the host drains them during the burst.

## Front-end control

The chips' slow control (i2c) runs through a CCUM hybrid and its CCU25 ASIC.
An FEC core in the FPGA talks to that ASIC. The FEC core comes from another
system and is not part of this RTL. `ttp_top` brings its host-side bus out as
ports (`fec_addr`, `fec_wdata`, `fec_we`, `fec_re`, `fec_rdata`,
`fec_rvalid`), and the USB protocol can reach that bus directly.

`doh_reset` drives the CCUM's reset input, active low. It sends one 64-clock
pulse after power-up and one `DOH_LEN`-clock pulse on each host command. The
published design only names this block, so its behaviour is this design's
own.

## Not in this RTL

- The FEC core (see above).
- The USB and TTC chips themselves: the FT245, the high-speed SX2 (unused
  here) and the TTCrx on the TTCrm.
- Clock-source selection. An external clock would be switched with the FPGA's
  clock resources, in front of `clk`.
- The VFAT chips and the power regulators.

## Verification

Every module has a self-checking testbench in `tb/` named `tb_<module>`. Each
one ends by printing `TB_RESULT checks=N failures=M`, and each has a watchdog.
The testbenches compare against models written separately from the RTL, and
they check cycle timing where the design defines it:

- pulse times against the stored intervals;
- the T1 line decoded bit by bit;
- word write times in the deserializer;
- the FT245 strobe widths.

`tb_ttp_top` runs the whole platform at its default sizes. The host side is
the FT245 model (`tb/ft245_model.sv`), which also checks the bus timing. The
front end is eight VFAT models (`tb/vfat_model.sv`) on the Roman Pot and GEM
lines, all listening to the T1 line. The test checks:

- loads and reads back patterns;
- runs bursts in all three modes and from all three sources;
- checks the command priority order;
- forces lost requests and checks that EC/BC still match the packets;
- switches to GEM readout;
- overfills a FIFO: 86 packets go in and 85 are kept;
- injects a header error;
- records s-bits;
- clears the FIFOs, resets the CCUM and accesses the FEC port.

It counts each of these mechanisms and fails if one never happened. It
compares every EC/BC record and every packet word read over USB with what the
VFAT models sent. The VFAT model's CRC is a CRC-16 (polynomial 0x1021)
standing in for the real chip's.

`tb_binary_scan` runs the binary scan of a Roman Pot hybrid, the test that
finds dead and noisy channels, at full size:

- all 128 channels, one after another;
- for each channel, the host selects it through the FEC port, standing in
  for the i2c write that enables its test charge;
- a burst of 80 CalPulse+LV1A pairs from the RAM;
- the host then reads the 80 EC/BC records and 960 words per chip.

It checks every header, chip ID and checksum, and matches each packet's EC
and BC against the FIFO records. It then counts the hits of every channel.
The VFAT models have one dead and one noisy channel planted, and the test
must find exactly those two. Each step fits the FIFOs with room to spare:
960 of 1024 words and 80 of 256 records. The run takes about 40 seconds.

`tb_full_burst` fills all 1024 RAM words and runs one burst of 1024
CalPulses. The intervals are random from 3 to 40 clocks, with a run at the
3-clock minimum and a few gaps of up to 100 000 clocks. The test decodes the
T1 line itself and checks every spacing against the stored word. It also
checks that no request was lost and that the s-bit FIFO stopped at 256
records.

### Running a testbench with Verilator

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ttp_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/ttp_pkg.sv tb/vfat_pkt_pkg.sv tb/tb_ttp_top.sv
./obj_dir/Vtb_ttp_top
```

Replace `tb_ttp_top` with any other testbench. List `tb/vfat_pkt_pkg.sv` only
for the testbenches that import it: the top, binary-scan, full-burst,
readout and deserializer tests.
`-y` lets Verilator find every other module by file name. The full-size
end-to-end run takes about one second.

## Changing it

- Sizes are parameters of `ttp_top`: `NCH`, `PG_WORDS`, `RO_DEPTH`,
  `EVT_DEPTH` and `SBIT_DEPTH`. The register map assumes `NCH = 4`, with one
  byte per channel in DROPPED, HDR_ERR and PKT_CNT. The fill fields of
  EVT_FILL and SBIT_STAT are 9 bits wide, enough for depths up to 256.
- Command codes, header nibbles and register offsets live in `ttp_pkg`.
- The RAM and FIFO memories are plain arrays. The RAM reads synchronously, as
  FPGA block RAM does. The FIFOs read asynchronously (show-ahead), which maps
  to distributed RAM, or to block RAM with an output stage if read timing
  allows one.
