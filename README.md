# CMX jet firmware in SystemVerilog

The CMX is a trigger merger module in the ATLAS level-1 calorimeter trigger.
Once every bunch crossing (40.08 MHz) it collects the jet trigger objects (TOBs)
that 16 processor modules of a crate send over the backplane. It does two things
with them. It counts how many jets pass each of 25 energy thresholds and sends
these multiplicities to the Central Trigger Processor (CTP). It also packs the
jets themselves into 24 serial links towards the topological processor (L1Topo).
On each level-1 accept (L1A) it reads out what it saw over two G-Link
style links. A small second FPGA, the board support FPGA (BSPT), gives VME access
to the board's housekeeping.

This repository holds synthesizable RTL for all of that logic. It also holds a
self-checking testbench for every block and one for the whole design.

## Data flow of one bunch crossing

```
 16 x (24 lines @160 Mbps + 80 MHz clock)
        |
  input_module ── 16 x input_channel: DDR capture -> 48 bit -> 96 bit -> clk40
        |                            odd parity check, error counters
        | 16 x 96 bits, clk40
  jet_decoder ── 25 multiplicities (3 bit, saturating)    ─> jet_adder ─> CTP
        |        ≤32 packed non-empty TOBs, count, overflow     ^  |
        |                                                 cable in  cable out
  jet_encoder ── TOBs + bunch counter -> 24 x 120-bit payloads
        |
  topo_data_tx ── 24 x topo_stream_ser (clk320: 8 words x 16 bit, K28.5, CRC-8)
                  24 x lowlat_fifo -> two GTX clock domains of 12 streams
  glink_tx (DAQ: 16 input words)  glink_tx (RoI: TOB list)   on L1A
```

Latency in clk40 cycles, counted from the system-domain input word:
multiplicities reach the CTP port after 2 cycles (decoder, adder). The L1Topo
payload is registered after 2 cycles (decoder, encoder). It then needs about
one more crossing to reach the GTX ports (serializer, FIFO, synchronizers).

## Backplane capture (`input_channel`, `input_module`)

This is the part with the most delicate timing. Each processor sends four
24-bit words per crossing, d0..d3, 6.25 ns apart. It forwards an 80 MHz clock
whose edges fall in the middle of the words. d0 and d2 are taken on the rising
edge and d1 and d3 on the falling edge. At every rising edge the last
rising/falling pair therefore forms a 48-bit word.

Whether a rising edge completes the first or the second pair of a crossing
depends on the phase of the system clock. The channel samples `clk40` at each
forwarded rising edge. The level given by `SECOND_PAIR_LEVEL` marks the edge at
which the full word {d3,d2,d1,d0} is assembled. That word stays stable for 25 ns
in the forwarded-clock domain, and the next `clk40` edge takes it over.

No synchronizer is used on this crossing. The board fixes the phase of the two
clocks, and the design relies on that. The testbenches place the first word at
t0 and the `clk40` edge at t0+35 ns, as the board timing intends. The word must
appear exactly at that edge. If your clock phases differ, you must choose
`SECOND_PAIR_LEVEL` and the clock placement together. Check that the set-up
margin at `clk40` is positive: the word is complete at t0+28.1 ns.

The input delay elements (IODELAY, 31 taps of 78 ps) are FPGA primitives and
are not in this RTL.

Word layout, used throughout (`cmx_pkg`): slot i (i = 0..3) in bits
[22i+21:22i] as {coord[2:0], et_small[8:0], et_large[9:0]}, presence flags in
[91:88], bits [94:92] spare, bit 95 odd parity over the whole word.
**This layout is an assumption.** The real backplane format is defined
elsewhere. Change `jet_tob_t`, `PRESENCE_LSB` and the parity rule in `cmx_pkg`
and `input_module` to match your format.

## Decoder and adder

`jet_decoder` is one combinational layer and one register, so it has one-cycle
latency. For each threshold t it counts the present TOBs whose selected energy
(`thr_small[t]` selects the small or the large window) is strictly greater
than `thr_value[t]`. The count saturates at 7. Independently, it packs the
present TOBs, in input order and then slot order, into 32 output slots. Each
packed TOB is tagged with its 4-bit input number. If more than 32 are present,
the rest are dropped and `overflow` is set. `tob_count` gives the true number.

`jet_adder` serves both roles of a CMX. In crate mode (`is_system = 0`) the
local multiplicities go to the CTP port. They also go out on the
crate-to-system cable with one odd parity bit. In system mode the word received
on the cable is parity checked and added per threshold to the local counts,
with saturation. `error` flags a bad cable word (system mode only) or an input
parity error in the crossing.

## L1Topo transmitter (`jet_encoder`, `topo_data_tx`)

Each GTX stream carries 128 bits per crossing, 24 streams in all (3072 bits).
`jet_encoder` registers one flat vector together with the bunch counter:

| bits | content |
|---|---|
| 0 .. 831 | 32 TOBs of 26 bits, TOB k at 26k |
| 832 .. 843 | bunch counter |
| 844 | overflow |
| 845 .. 851 | TOB count |
| 852 .. 2879 | zero |

The vector is cut into 24 payloads of 120 bits. Payload g is bits
[120g+119:120g].

`topo_stream_ser` sends a payload as eight 16-bit words at 320.64 MHz. Words 0..6
carry the payload, and word 7 carries the last payload byte plus a CRC-8. The
CRC uses the polynomial x^8+x^2+x+1 with initial value 0. It takes bytes low
byte first and bits MSB first, and it covers the 120 payload bits. A payload that
is all zero goes out as K28.5 control characters instead (`charisk` set). Since
the TOBs are packed from slot 0, quiet crossings leave most streams in this
state. The crossing start reaches the 320 MHz domain as a `clk40` toggle through
two flip-flops. `clk320` must be phase locked to `clk40`, with eight periods per
crossing.

Each stream then crosses into its GTX clock domain through its own
`lowlat_fifo`. This is an 8-entry dual-port memory with Gray-coded pointers that
starts reading at two words. Streams 0..11 use `gtx_clk[0]` and streams 12..23
use `gtx_clk[1]`. Both GTX clocks run at the 320 MHz frequency with an arbitrary
phase, so the FIFO level stays constant. `fifo_error` reports any overflow or
underflow. The GTX transceivers themselves (8b/10b encoding, 6.4 Gbps,
TX-buffer bypass) are outside this RTL: connect `gtx_txdata` and
`gtx_txcharisk` to the 16-bit user ports.

## G-Link readout (`glink_tx`)

On an L1A the readout record is copied into 20 shift registers, one per G-Link
user data line. In each clock the link then carries the word
data[20k+19:20k] with DAV high. After the last word, each line sends its odd
parity bit, still with DAV high. Then DAV drops for at least `GAP_CYCLES`
(default 1) cycles with the data lines low.

The DAQ record is the 16 input words. That is 1536 bits, so 77 words plus the
parity word, 78 clocks per event. The RoI record is the 852-bit TOB vector,
which takes 43 words plus parity. An L1A that arrives during a frame is not
queued: it is dropped and `l1a_lost` pulses. The logic runs at one word per
`clk40` cycle, which is the word rate of a 960 Mbps G-Link. Line coding and
serialization belong to the transceiver.

The record must already belong to the accepted crossing, because no
L1A-latency pipeline is built. In `cmx_top` the DAQ link reads the input words
and the RoI link reads the decoder output of the cycle in which the L1A is
sampled.

## Board support FPGA (`bspt_fpga`, `i2c_master`)

`bspt_fpga` is a VME A24/D16 slave. It answers in the first 256 bytes of the
board's 512 KB window: 0x700000 for the CMX in slot 3 and 0x780000 for slot 20,
chosen by `ga`. It synchronizes AS*/DS*/WRITE* with two flip-flops. After the
access it pulls DTACK* low and holds it until DS* is released. It enables the
data transceivers for every cycle and sets them to drive the bus only on reads.

| offset | access | register |
|---|---|---|
| 00 / 02 | RO | module ID / revision (parameters) |
| 04 / 06 | RW | module control / resets (levels on pins) |
| 08 / 0A | RO | status inputs 1 / 2 |
| 0C / 0E | RO | LVDS requests {TP, BF} / {conflict, direction} |
| 10+4k / 12+4k | RW | I2C control-status / data, k = SFP1..4, MP12, MP345 |
| 30 / 32 | RW / RO | TTCrx control / status |
| 34 / 36 | RO | TTCDec broadcast / DQ, latched on their strobes |
| 80..DE | RW | System ACE MPU registers (offset - 0x80 on MPA) |

Other offsets are reserved. They acknowledge, read 0 and ignore writes.

To use the I2C channels:

* **Write** bits 15..8 of the data register first. Then write
  {0, device[6:0], register[7:0]} to the control register.
* **Read** by writing {1, device, register} to the control register. Poll until
  bit 15 (busy) clears, then read the byte from bits 7..0 of the data register.

Bit 14 of control-status is the NACK flag. `i2c_master` does single-byte
transfers with a repeated start for reads. SCL runs at f_clk/(4·DIV), which is
100 kHz at 40 MHz. The master accepts clock stretching.

A System ACE access holds CE* together with WE* or OE* for `ACE_CYCLES`
clocks. WE* or OE* is released one clock before CE*. An LVDS link becomes an
output when the BF or the TP FPGA requests it. If both request it, it stays an
input and its conflict bit is set. The LEDs show VME activity, BF done, TP done
and I2C busy.

## What is not here, and what is assumed

Not built:

* **FPGA primitives:** GTX transceivers, IODELAY, MMCM clock generation.
* **Base FPGA VME, spy memories and L1A pipeline:** not defined. Thresholds and
  the crate/system mode are ports of `cmx_top`.
* **TTCDec dump RAM** (0x40-0x5E): not defined.
* **System ACE and FPGA configuration control:** beyond the register access.
* **Topo FPGA firmware.**

Chosen in this design rather than given:

* **Data formats:**
  * the TOB layout in the 96-bit word and the parity rule;
  * 3-bit multiplicities and the small/large window select;
  * the L1Topo vector layout;
  * the CRC polynomial and position;
  * the "all-zero payload means control characters" rule;
  * the G-Link bit-to-line mapping and record contents.
* **Buffering and links:** the FIFO depth and start level, and one remote crate
  on the cable.
* **BSPT details:** the I2C register bit layout, the LVDS rule, the ACE timing,
  the register reset values and the LED use.

Each RTL file's header comment says which of its behaviour is specified and
which is chosen.

## Files and simulation

`rtl/cmx_pkg.sv` holds the shared sizes, types and the CRC function. Every
other file in `rtl/` holds one module. The top is `rtl/cmx_top.sv`, with the
base FPGA and the BSPT side by side. Each module `X` has a testbench
`tb/X_tb.sv` that prints `TB_RESULT checks=N failures=M`.
`tb/i2c_slave_model.sv` is a behavioural I2C device used by the I2C, BSPT and
top testbenches.

Run one testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/cmx_pkg.sv tb/cmx_top_tb.sv \
          --top-module cmx_top_tb -Mdir obj && ./obj/Vcmx_top_tb
```

`cmx_top_tb` runs the whole design at its default size. It sends 360 crossings
from 16 modules, drives the crate/system mode, L1As, bunch-counter resets and
the cable, and makes a VME and I2C exchange on the BSPT side. It rebuilds every
L1Topo frame and every G-Link frame and compares them with its own model of the
chain.

The testbench also counts how often each mechanism occurred: parity errors,
TOB overflow, saturation, idle frames, both adder modes, cable errors,
accepted and lost L1As, bunch-counter reset, VME and I2C. A mechanism that never
occurs counts as a failure. Building it takes about three minutes, and the run
takes under a second.
