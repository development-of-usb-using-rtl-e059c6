# UTMI transceiver core with Manchester line coding

A USB-style device controller is split into three parts. Device-specific logic talks to a
Serial Interface Engine (SIE), and the SIE talks to a transceiver macrocell through the
UTMI, a byte-wide parallel interface. The macrocell turns bytes into a serial packet on the
two bus wires DP and DM, and serial packets back into bytes. This repository holds the
digital half of that macrocell. It has a transmitter, a receiver, and the control logic
that sets the operating mode and the line rate.

What sets this variant apart is the line code. Each bit is Manchester coded:

- a 1 is a low-to-high transition of DP in the middle of the bit cell;
- a 0 is a high-to-low transition;
- DM is always the complement of DP while data is on the line.

As in USB, a packet is framed by a SYNC byte in front and an end-of-packet (EOP) marker
behind it, and long runs of 1s are broken up by bit stuffing.

## The packet on the wires

```
 idle(J) | SYNC 0 1 1 1 1 1 1 0 | data bytes, LSB first, 0 after six 1s | SE0 SE0 J | idle(J)
```

- **Half cells.** Every bit takes two half cells. A data bit `b` puts DP = `~b` in the
  first half and DP = `b` in the second, with DM = ~DP throughout.
- **SYNC.** The SYNC byte is `01111110`, sent as eight Manchester bits without stuffing.
  It already contains six 1s, and stuffing it would break the pattern the receiver looks for.
- **Bit stuffing.** The count starts at the first data bit. After six consecutive 1s the
  transmitter inserts a 0. If the packet's last bits complete a run of six, that stuffed 0
  still goes out before the EOP.
- **EOP.** The EOP is three uncoded bit times: two of SE0 (DP = DM = 0), then one of J
  (DP = 1, DM = 0).
- **Idle.** Between packets the drivers are released (`line_oe_o = 0`). The bus is expected
  to rest in J.

Line states: J = (DP 1, DM 0), K = (DP 0, DM 1), SE0 = (0, 0).

## One clock, two rates

The core has a single clock running at twice the high-speed bit rate: 960 MHz for
480 Mbit/s. `utmi_control` derives the serial timing from it with clock enables:

- `half_ce` pulses once per half bit cell. In high-speed mode (XcvrSelect = 0) that is every
  clock. In full-speed mode (XcvrSelect = 1) it is every `FS_HALF_BIT_CLKS` = 40 clocks,
  which gives 12 Mbit/s.
- `phase` says which half of the bit is under way. A bit boundary is `half_ce && phase`.

Both directions use the same `half_ce`. The transmit sources (SYNC generator, bit stuffer,
EOP generator) all advance on the bit boundary, and the encoder loads the next bit-time
symbol at that edge. The encoder's outputs are registered, so each half cell lasts exactly
one `half_ce` period.

The parallel side runs on the same clock. TXReady and RXValid are single-clock handshakes.
Nothing crosses a clock domain, so there is no elasticity buffer and no "skip a byte time"
behaviour.

## Transmitter (`utmi_tx`)

```
data_i -> [TX hold reg] -> [TX shift reg] -> [bit stuffer] --+
                                       [SYNC generator] -----+--> [Manchester encoder] -> DP/DM/OE
                                       [EOP generator]  -----+
                          [transmit state machine] controls all of them
```

At each bit boundary the encoder takes the next symbol from the first source that has one:
SYNC generator, then bit stuffer, then EOP generator. If none has a symbol, the line is
released.

Transmit state machine (`utmi_tx_fsm`):

| state        | TXReady | leaves when                                                 |
|--------------|---------|-------------------------------------------------------------|
| Reset        | 0       | rst low -> TX Wait                                           |
| TX Wait      | 0       | TXValid -> Send SYNC                                         |
| Send SYNC    | 0       | after one clock (starts the SYNC generator) -> TX Data Load  |
| TX Data Load | 1       | TXValid: byte taken -> TX Data Wait; !TXValid -> Send EOP    |
| TX Data Wait | 0       | hold register empty -> TX Data Load                          |
| Send EOP     | 0       | EOP sent -> Reset (then TX Wait on the next clock)           |

**Handshake.** A byte moves at the clock edge where both TXValid and TXReady are high.
TXReady is a Moore output of the state, so an SIE can look at it during the cycle.

**Hold and shift registers.** The hold and shift registers are separate. The first byte
(the PID) is accepted while SYNC is still going out and moves straight into the shift
register. The next byte then waits in the hold register. From there on, each byte moves to
the shift register in the same clock in which the last bit of the previous byte leaves, so
bytes follow each other with no gap.

**Keeping up.** A full byte time is 16 clocks in HS and 640 in FS. The SIE has that long to
offer the next byte after a TXReady. If it is late, the packet runs dry and the line goes
idle early.

**End of packet.** When TXValid is low in TX Data Load, the state machine moves to Send
EOP. It first waits until the hold register, the shift register and any owed stuffed bit
have drained. Only then does it enable the EOP generator.

## Receiver (`utmi_rx`)

```
DP/DM -> [SYNC detector] --align--> [Manchester decoder] -> [bit unstuffer] -> [RX shift reg] -> [RX hold reg] -> data_o
                                          |                       |
                                    [EOP detector]          stuff error
                     [receive state machine]: RXActive, RXValid, RXError
```

The hardest part of the receiver is knowing where a bit starts.

**Finding the bit phase.** The SYNC detector keeps the last 16 half-cell samples of DP, plus
a flag per sample that DM differs from DP. It fires when they equal the Manchester image of
`01111110`. Idle J before SYNC cannot give a false match one half cell off. The detection
tells the decoder that the next sample is the first half of a bit. The receiver accepts that
alignment only in RX Wait, so a SYNC-like pattern inside data is ignored.

**Decoding.** The decoder takes two samples per bit:

| first half | second half | result          |
|------------|-------------|-----------------|
| K          | J           | 1               |
| J          | K           | 0               |
| SE0        | SE0         | SE0             |
| J          | J           | J               |
| any other  |             | code violation  |

For data, the XOR of the two DP halves is 1, and the bit value is the second half.

**Unstuffing.** After six 1s the next bit must be 0, and it is dropped. A 1 there is a stuff
error.

**Bytes.** Bits fill the shift register least significant bit first. A full byte stays in
the shift register for one clock, then moves into the hold register. `rx_valid_o` goes high
for exactly the clock in which the new byte first sits on `data_o`. From the edge that
samples the last half of a byte's last bit to RXValid is four clocks.

Receive state machine (`utmi_rx_fsm`):

| state        | RXActive | RXValid | RXError | leaves when                              |
|--------------|----------|---------|---------|------------------------------------------|
| Reset        | 0        | 0       | 0       | rst low -> RX Wait                        |
| RX Wait      | 0        | 0       | 0       | SYNC detected -> Strip SYNC               |
| Strip SYNC   | 1        | 0       | 0       | byte -> RX Data; EOP -> Strip EOP         |
| RX Data      | 1        | 1       | 0       | next clock -> RX Data Wait; EOP -> Strip EOP |
| RX Data Wait | 1        | 0       | 0       | byte -> RX Data; EOP -> Strip EOP         |
| Strip EOP    | 0        | 0       | 0       | next clock -> RX Wait                     |
| Error        | 0        | 0       | 1       | EOP -> RX Wait                            |

A stuff error or a code violation inside a packet moves the
machine to Error from Strip SYNC, RX Data or RX Data Wait.

**EOP detection.** The EOP detector reports a J that follows two or more SE0 bit times.

**Listening while sending.** The receiver listens all the time, including while the core
itself transmits. Looping DP/DM back therefore returns the core's own packet, which the
testbench uses.

## Operational modes (OpMode[1:0])

| OpMode | effect                                                                   |
|--------|--------------------------------------------------------------------------|
| 0      | normal: stuffing and Manchester coding                                   |
| 1      | non-driving: `line_oe_o` stays 0, the state machines still run           |
| 2      | raw: no stuffing, no Manchester coding; a 1 goes out as J and a 0 as K for the whole bit. SYNC and EOP framing stay |
| 3      | reserved, behaves as 0                                                    |

OpMode and XcvrSelect are registered once. Change them only while no packet is in flight.
The modes affect the transmitter only; the receiver always expects Manchester-coded packets.

## Interface of `utmi_top`

| port            | dir | width | meaning |
|-----------------|-----|-------|---------|
| `clk`, `rst`    | in  | 1     | core clock (2x HS bit rate); synchronous active-high reset |
| `opmode_i`      | in  | 2     | OpMode |
| `xcvr_select_i` | in  | 1     | 0 high speed, 1 full speed |
| `tx_valid_i`    | in  | 1     | SIE has a byte / packet in progress |
| `tx_ready_o`    | out | 1     | byte on `data_i` taken at this edge if `tx_valid_i` |
| `data_i`        | in  | 8     | bidirectional data bus, SIE to core |
| `data_o`        | out | 8     | bidirectional data bus, core to SIE (receive hold register) |
| `data_oe_o`     | out | 1     | drive the data bus towards the SIE; equals `!tx_valid_i` |
| `rx_active_o`   | out | 1     | a packet is being received |
| `rx_valid_o`    | out | 1     | `data_o` holds a new byte (one clock) |
| `rx_error_o`    | out | 1     | receive error (stuff error or code violation) |
| `dp_o`, `dm_o`  | out | 1     | line driver data |
| `line_oe_o`     | out | 1     | line driver enable |
| `dp_i`, `dm_i`  | in  | 1     | line receiver outputs |

The 8-bit data bus is bidirectional on the chip. Here it is split into `data_i`, `data_o`
and `data_oe_o` so a pad or tri-state buffer can be added outside. The line wires are split
the same way.

## What this RTL fills in or changes

The original description gives the block structure, both state diagrams, the SYNC value, the
six-1s rule, the Manchester polarity, the EOP shape, the mode table and the two line rates.
The following points are this design's own choices:

- **Clocking.** One 960 MHz clock with half-bit clock enables, instead of a slower parallel
  clock and clock-domain crossing.
- **Bit order.** Least significant bit first, on both sides.
- **SYNC framing.** SYNC is sent unstuffed. The receiver recognises the Manchester image of
  the same `01111110` that the transmitter sends. A different "encoded" pattern was stated
  for the receiver, but it does not match the transmitter.
- **Decoder.** Manchester decoding over half-cell pairs. No NRZI decoding.
- **Transmit state machine.** It returns to Reset after the EOP, as the transmit state
  diagram shows, and passes through at least one clock of TX Data Wait per byte. Send EOP
  waits for the serial path to drain.
- **Receive state machine.** RX Data lasts one clock per byte and RX Data Wait covers the
  shifting in between. Strip SYNC can go straight to Strip EOP. The Error state is left on
  the next EOP. Code violations count as receive errors.
- **Line timing recovery.** The receiver samples on the transmitter's `half_ce`. It does
  not recover timing from the line. In a real device a DLL or data-recovery circuit in
  front of it would provide sample strobes aligned to the incoming cells.
- **Not built.** The analog front end (HS/FS drivers and receivers, terminations and
  TermSelect), the DLLs, the elasticity buffer, the HS/FS receive-path multiplexer, the
  clock multiplier, the SIE and endpoint logic, and suspend/wake-up detection. Their
  behaviour is not defined in enough detail.

## Files

`rtl/`, one module or package per file:

- `utmi_pkg.sv`: mode, symbol and state enums, SYNC value, stuffing run length
- `utmi_top.sv`: the core, with the data bus direction logic
- `utmi_control.sv`: OpMode/XcvrSelect registers, half-bit strobe and phase
- `utmi_tx.sv`, `utmi_tx_fsm.sv`, `utmi_sync_gen.sv`, `utmi_tx_shift.sv`,
  `utmi_bit_stuffer.sv`, `utmi_eop_gen.sv`, `utmi_manchester_enc.sv`: transmit path
- `utmi_rx.sv`, `utmi_rx_fsm.sv`, `utmi_sync_det.sv`, `utmi_manchester_dec.sv`,
  `utmi_bit_unstuffer.sv`, `utmi_rx_shift.sv`, `utmi_eop_det.sv`: receive path

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each compares against a
reference worked out in the bench, has a watchdog, and ends with a
`TB_RESULT checks=N failures=M` line.

`tb_utmi_top` is the end-to-end test, run at the default parameters. It loops the line back
and compares every half cell the core drives with a reference stream built from the bytes.
That comparison also checks the rate: one clock per half cell in HS, 40 in FS. It compares
the received bytes, then injects its own packets to check the receiver alone, including a
stuff error and a code violation. It also checks OpMode 1 and 2 and the data bus direction.
It counts every mechanism (stuffing, unstuffing, TX and RX Data Wait, SYNC and EOP
detection, both rates, both error kinds, both special modes) and fails if one never happens.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
          rtl/utmi_pkg.sv tb/tb_utmi_top.sv --top-module tb_utmi_top -Mdir obj_top -o sim
./obj_top/sim
```

The package must come first on the command line; the other modules are found through `-Irtl`.
The RTL carries no `` `timescale ``, hence the `--timescale` option. Replace `tb_utmi_top` with
any other `tb_<module>` to run a unit test. Every bench finishes
in well under a second of run time. The only size parameter is `FS_HALF_BIT_CLKS` on
`utmi_top`/`utmi_control`. Set it to match another core clock frequency; the
high-speed rate is always one half bit per clock.

## Synthesis size

Generic synthesis of `utmi_top` gives about 300 word-level cells and 142 flip-flops.
