# V3CP — a single-port link for a front-end ASIC

The VFAT3 comm port (V3CP) lets a front-end chip use one port for all of its
traffic with a GBTX link chip. Three e-link pairs run at 320 Mb/s:

* **CLOCK**: the 320 MHz clock. The chip derives its 40 MHz bunch-crossing
  clock from it.
* **DATA_IN**: the downlink. It carries one 8-bit character per 40 MHz
  period. Each character is a fast command: a trigger, a counter reset, a
  calibration pulse, or one bit of slow control.
* **DATA_OUT**: the uplink. It carries one byte per 40 MHz period: tracking
  data, slow-control replies, or fillers.

Two ideas make the downlink robust:

* **An error-correcting character set.** Each character carries only 4 bits
  of information. The 8-bit characters are chosen so that any single flipped
  bit can be corrected and any two flipped bits detected.
* **Comma characters that set the phase.** Two extra characters, not valid
  as data, mark the character boundary. The chip's 40 MHz clock phase is
  locked to that boundary, so every command arrives with a fixed, known
  latency.

This repository holds synthesizable SystemVerilog for the port, triplicated
against single-event upsets, and a self-checking testbench for every block.

## Block structure

```
            DATA_IN ──► v3cp_receiver ──► v3cp_decoder ──► v3cp_data_controller ──► commands, slow-control bits
                          │   ▲ ce40                          ▲ ce40      │ tx_word
                    align ▼   │                               │           ▼
  CLOCK 320 MHz ──► v3cp_clock_divider ──► ce40, clk40        │    v3cp_transmitter ──► DATA_OUT
                                                              │
                    data formatter / slow-control replies ────┘
```

`v3cp_core` is one copy of this chain. The top, `v3cp`, instantiates three
copies and votes every output with `v3cp_voter`. Shared types and constants
are in `v3cp_pkg`. They include the code table, the command encoding, the
`rx_char_t` struct that the decoder hands on, and the uplink framing bytes.

| File | Role |
|---|---|
| `rtl/v3cp_pkg.sv` | code table (`encode4to8`), commas, sync pattern, command enum, uplink framing bytes |
| `rtl/v3cp_receiver.sv` | serial sampling, sync-pattern search, character hand-off, CC-B check, slip report |
| `rtl/v3cp_clock_divider.sv` | 320 → 40 MHz divider whose phase is restarted by the sync pattern |
| `rtl/v3cp_decoder.sv` | 8-to-4-bit decoder: single-error correction, double-error detection, commas |
| `rtl/v3cp_data_controller.sv` | executes fast commands; frames the uplink |
| `rtl/v3cp_transmitter.sv` | 8:1 serializer onto DATA_OUT |
| `rtl/v3cp_core.sv` | one copy of the port |
| `rtl/v3cp_voter.sv` | bitwise 2-of-3 majority with a mismatch flag |
| `rtl/v3cp.sv` | top: three copies plus the voters |

The port spans two layers:

* **General layer.** The receiver, clock divider, decoder and transmitter
  could serve any chip on a GBTX e-link.
* **Chip-specific layer.** The data controller decides what the characters
  mean for VFAT3 and how uplink data is framed.

## The downlink character set

There are 16 data characters and two commas. Bits are listed with the most
significant bit first, which is also the order in which they are sent.

| char | value | 8-bit code | | char | value | 8-bit code |
|---|---|---|---|---|---|---|
| A | 0000 | 00000000 | | I | 1000 | 10010110 |
| B | 0001 | 00001111 | | J | 1001 | 10011001 |
| C | 0010 | 00110011 | | K | 1010 | 10100101 |
| D | 0011 | 00111100 | | L | 1011 | 10101010 |
| E | 0100 | 01010101 | | M | 1100 | 11000011 |
| F | 0101 | 01011010 | | N | 1101 | 11001100 |
| G | 0110 | 01100110 | | O | 1110 | 11110000 |
| H | 0111 | 01101001 | | P | 1111 | 11111111 |
| CC-A | — | 00010111 | | CC-B | — | 11101000 |

The 16 data codes form a linear [8,4,4] code, an extended Hamming code.
Each code is the XOR of generator rows picked by the bits of the value:

* value bit 3 → `96`
* value bit 2 → `55`
* value bit 1 → `33`
* value bit 0 → `0F`

(all hex). Any two data codes differ in at least 4 bits. For a received
byte this leaves three cases:

* **Distance 0 from a code.** The byte is that data character.
* **Distance 1 from a code.** That code is unique: two codes each within one
  bit of the byte would be at most 2 bits apart. The bit is corrected and
  `corrected` is set.
* **Anything else** is reported as an error (`CHAR_ERROR`). Every 2-bit error
  lands here.

`v3cp_decoder` compares the byte with all 16 codes in parallel (16 XOR +
popcount units) and registers the result. That gives one cycle of latency
and an `rx_char_t {valid, kind, data, corrected}`.

The commas are handled apart from the data codes:

* **Distance to the data codes.** CC-A and CC-B are each 2 bits from some
  data codes.
* **Exact match only.** The decoder accepts a comma only on an exact match.
* **A comma with one flipped bit cannot be told apart** from a data
  character with one flipped bit. It is decoded as that data character, or
  reported as an error.
* **Two flipped bits can forge a comma.** They can turn a data code into a
  comma: H (`01101001`) with its two outer bits flipped reads as CC-B.

## Finding the character boundary

The receiver shifts DATA_IN into a 24-bit register, one bit per 320 MHz edge.
When the register holds **three consecutive CC-A** (`17 17 17` hex), the
receiver acts in that same cycle:

1. It pulses `align`. The clock divider restarts, so that this cycle becomes
   a character boundary.
2. It sets `synced`.

From then on, at each `ce40` strobe of the divider, the last eight bits are
one character:

* **Normal characters** go to the decoder.
* **CC-B on the boundary** while synchronised pulses `sync_verified`. The
  link partner can send CC-B to confirm the phase.
* **A sync pattern at a different bit phase** while synchronised realigns
  the port and pulses `sync_slip`. The characters caught across the jump
  are garbage. They usually show up as a corrected or detected error.

`v3cp_clock_divider` is a modulo-8 counter. Its outputs are:

* **`ce40`** is high in the cycle that holds the last bit of each
  character. It is a clock enable for the whole port: all blocks run on the
  320 MHz clock.
* **`clk40`** is a registered 50 % clock that rises right after each
  boundary. It is meant for the rest of the chip.

No rule drops `synced` once it is set. Only reset clears it.

## Fast commands and slow control

When synchronised, every data character is a command. The data controller
decodes it into outputs that it holds for one full 40 MHz period. The rest
of the chip, clocked by `clk40`, therefore samples each command exactly once.

| char | command | outputs |
|---|---|---|
| B | ECO | `eco` (event counter reset) |
| C | BCO | `bco` (bunch-crossing counter reset) |
| D | CalPulse | `calpulse` |
| E | ReSync | `resync` (reset of the chip's state machines) |
| F | SCOnly | sets `sc_only` |
| G | RunMode | clears `sc_only` |
| H | LV1A | `lv1a` |
| I | SC0 | `sc_bit_valid`, `sc_bit = 0` |
| J | SC1 | `sc_bit_valid`, `sc_bit = 1` |
| K | ReSC | `resc` (slow control reset) |
| L | LV1A+ECO | `lv1a`, `eco` |
| M | LV1A+BCO | `lv1a`, `bco` |
| N | LV1A+ECO+BCO | `lv1a`, `eco`, `bco` |
| O | ECO+BCO | `eco`, `bco` |
| A, P | — | nothing (A is the idle character) |

Commas and characters with a detected error execute nothing.
`sec_event` and `ded_event` report a corrected error and a detected error
for the same period. Characters received before `synced` are ignored.

Slow control rides on the same character stream. The downlink can carry
one SC0/SC1 character per 40 MHz period, so the slow control receives a
serial bit stream at up to 40 Mb/s. Turning those bits into register
transactions is the slow-control block's job, which is outside this
design.

## Uplink framing

One byte per 40 MHz period goes out on DATA_OUT, most significant bit first.
The data controller builds the stream from two byte sources:

* **Tracking data** from the data formatter: `df_valid / df_data / df_last / df_ready`.
* **Slow-control replies**: `sc_tx_valid / sc_tx_data / sc_tx_last / sc_tx_ready`.

Each source sends packets that end with `last`. A byte moves when valid and
ready are both high, and ready is high only in a `ce40` cycle. A source
must hold its byte until it is taken. Assertions in the data controller
check this.

The framer is a three-state machine (idle, tracking, slow control). It
updates `tx_word` at each strobe:

* **Idle.** It starts a tracking packet with header `1E` if tracking data
  waits and the port is not in slow-control-only mode. Otherwise it starts a
  slow-control packet with header `5C` if a reply waits. Otherwise it sends
  the filler `F0`.
* **Inside a packet.** It sends one payload byte per period, until `last`.
  If the source has no byte that period, it sends a filler byte instead.

In slow-control-only mode no tracking packet is started. The link is then
left to slow control.

Only the three kinds of uplink data come from the port's definition:
tracking data, slow-control data and fillers. The following are this
design's own choices:

* the header and filler values;
* the packet handshake;
* the priority order;
* the meaning of slow-control-only mode.

The payload is sent as it is, not coded. The uplink carries no packet
length, so the receiving end must know how long each packet type is.

## Triplication

`v3cp` runs three complete copies of `v3cp_core` on the same inputs. Every
output passes through a bitwise 2-of-3 majority voter. An upset in one copy
never reaches the chip. `tmr_mismatch` is high while the copies disagree.

The copies do not vote their internal state back into each other. An upset
that moves one copy's divider phase or mode flag persists until the next
sync pattern or command repairs it. Until then the other two copies carry
the vote.

## Timing

All numbers are in 320 MHz cycles.

* **Downlink to command output.** Suppose the last bit of a character is on
  DATA_IN during cycle *t*. It is sampled at the end of *t*. The receiver
  presents the byte one edge later, the decoder one edge after that, and the
  data controller's outputs change on the next edge. The outputs then stay
  stable for 8 cycles. The testbenches measure 5 cycles from the cycle that
  drives the last bit to the first edge that sees `lv1a` high. They check
  that this latency is the same for every trigger.
* **Data controller to DATA_OUT.** A byte chosen by the data controller at
  one strobe is loaded into the serializer at the next strobe. Its first bit
  appears on DATA_OUT on the following cycle. Bytes follow each other with
  no gap.
* **Rates.** 320 Mb/s in each direction, 40 M characters/s, and up to
  40 Mb/s of slow-control bits.

## Top-level ports (`v3cp`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 320 MHz e-link clock; asynchronous active-low reset |
| `data_in` / `data_out` | in / out | 1 | downlink / uplink, 320 Mb/s |
| `clk40`, `ce40` | out | 1 | divided clock; 40 MHz strobe in the 320 MHz domain |
| `lv1a eco bco calpulse resync` | out | 1 each | commands, each held for one 40 MHz period |
| `sc_only` | out | 1 | slow-control-only mode |
| `sc_bit sc_bit_valid resc` | out | 1 each | slow-control bit stream and reset |
| `sc_tx_*` | in/out | 8 + 3 | slow-control reply stream |
| `df_*` | in/out | 8 + 3 | tracking data stream from the data formatter |
| `synced sync_verified sync_slip` | out | 1 each | link status |
| `sec_event ded_event` | out | 1 each | corrected / detected error this period |
| `tmr_mismatch` | out | 1 | the three copies disagree |

The e-links are differential on silicon. Here they are single-ended logic
signals. The pad cells, the GBTX, the data formatter, the slow-control
registers and the chip's control logic are not part of this RTL. Their
connections are the ports above.

## Simulating

Every testbench in `tb/` is self-checking. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. To build and run one
with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/v3cp_pkg.sv \
          tb/tb_v3cp.sv --top-module tb_v3cp --Mdir obj_tb_v3cp -o sim
./obj_tb_v3cp/sim
```

Use the same command for the other testbenches:

| testbench | what it checks |
|---|---|
| `tb_v3cp` | Triplicated top at its defaults, end to end through the serial pins. A GBTX-side model synchronises at a random phase, checks CC-B and sends every command. It also runs a 32-bit slow-control stream, a corrected error and a detected error, a phase slip, and uplink framing in run mode and slow-control-only mode. It forces an upset in one copy and checks the trigger latency. It counts each mechanism and fails if any never happens. |
| `tb_v3cp_core` | The same sequence on one copy, without the upset test. |
| `tb_v3cp_receiver` | Bit-level sync search, character hand-off, CC-B checks, resync after a 3-bit shift. |
| `tb_v3cp_clock_divider` | Period, duty cycle, realignment at every offset. |
| `tb_v3cp_decoder` | All 256 input bytes against a reference built from the generator rows. |
| `tb_v3cp_data_controller` | Every character with and without sync, mode flag, slow-control bit rate, uplink frames and priorities. |
| `tb_v3cp_transmitter` | Bit order and gap-free serialisation. |
| `tb_v3cp_voter` | Random triples with one or more copies corrupted. |

The testbenches rely only on two-state simulation: every register that is
read has a reset. They generate their stimulus with `$urandom`.

## How far the RTL can be trusted

The following come straight from the port's definition, and the
testbenches check them:

* the character set;
* single-error correction and double-error detection;
* the three-CC-A sync pattern and the CC-B check;
* the 8:1 clock relation;
* the command table;
* the 40 Mb/s slow-control path;
* the three uplink data kinds;
* the triplication.

The definition leaves the rest open. Where this design makes its own
choice, that choice is listed here and in the header comment of each file:

* **Clocking.** One 320 MHz clock domain with a 40 MHz clock enable,
  instead of separate clock domains.
* **Bit order.** Most significant bit first in both directions.
* **Sync handling.** An exact-match comma rule. No loss-of-sync detection:
  a new sync pattern simply realigns the port.
* **Command outputs.** Each is held for one 40 MHz period. Commands before
  sync are ignored.
* **ReSync.** Only brought out as `resync`. The port's own uplink framer is
  not reset, so a packet in progress is not cut.
* **Slow-control-only mode.** It stops new tracking packets. Triggers still
  pass through.
* **Uplink framing.** The header values (`1E`, `5C`), the filler (`F0`),
  the handshake, tracking-first priority, and the filler inside a packet
  whose source runs dry.
* **Triplication.** Whole copies with output voting, not register-level
  voting with feedback.
