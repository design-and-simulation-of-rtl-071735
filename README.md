# CAN protocol controller in SystemVerilog

A Controller Area Network (CAN) node lets a microcontroller exchange short messages (up to 8
data bytes, with an 11- or 29-bit identifier) with other nodes over one shared two-level bus.
The bus is a wired AND: any node driving a dominant 0 wins over all nodes sending a recessive 1.
CAN uses this for collision-free access: nodes that start together keep sending their
identifiers bit by bit, and a node that sends 1 but reads back 0 has lost. It then becomes a
receiver, and the frame with the lowest identifier goes through undamaged.

This controller does everything time-critical for the host. The host writes a message into a
transmit buffer and sets a command bit. The controller then:

- waits for the bus to be free and arbitrates;
- frames the message, inserts stuff bits and appends a CRC;
- checks that some node acknowledged it;
- retries after a lost arbitration or an error.

In the other direction, it:

- synchronises to other nodes' bit edges and removes their stuff bits;
- checks CRC and format and acknowledges correct frames;
- filters frames by identifier and queues accepted ones in a 64-byte receive FIFO.

Error counters enforce CAN fault confinement. A node that keeps seeing errors first becomes
error passive, then goes bus off and stops disturbing the bus.

The line transceiver (the analog driver that turns `tx`/`rx` into the differential bus) and the
host processor are outside this design.

## Block structure

```
             host bus (cs, rd, wr, addr, data_in, data_out)
                              |
   +--------------------------+-------------------------------------------+
   | can_top: mode/command/status, bus timing, acceptance code & mask,     |
   |          13-byte transmit buffer (can_register x 13), receive window  |
   |                                                                       |
   |  can_brp --tq_tick--> can_btl --sample_point/sampled_bit/tx_point--+  |
   |  (quantum)            (bit timing)                                 |  |
   |                                                                    v  |
   |       can_eml <--error/success pulses-- can_bsp --tx--> tx pin        |
   |   (TEC, REC, state) --passive/bus-off-->  | (frames, arbitration,     |
   |                                           |  errors; uses can_crc,    |
   |                                           |  can_stuff, can_ibo)      |
   |                     can_acf <--id, data---+                           |
   |                  (acceptance)  --id_ok--> +--bytes--> can_fifo        |
   |                                                       (uses can_ram)  |
   +-----------------------------------------------------------------------+
                              rx pin --> can_btl
```

| File | Block |
|---|---|
| `can_pkg.sv` | CRC polynomial, error limits, error state enum, message struct |
| `can_top.sv` | the controller: host registers and wiring |
| `can_brp.sv` | baud rate prescaler: one `tq_tick` every `baud_r_presc+1` clocks |
| `can_btl.sv` | bit timing: segments, hard sync, resync, sample and transmit points, triple sampling |
| `can_bsp.sv` | bit stream processor: frame state machine, arbitration, error detection, error frames, FIFO writes |
| `can_crc.sv` | serial CRC-15 |
| `can_stuff.sv` | run-length counter that marks stuff bits and stuff errors |
| `can_ibo.sv` | bit order reversal of a received byte |
| `can_acf.sv` | acceptance filter (code/mask bytes; basic, single and dual filter) |
| `can_eml.sv` | error counters and error active / passive / bus-off state |
| `can_fifo.sv` | receive message FIFO with per-message lengths and overrun |
| `can_ram.sv` | two-port 64x8 RAM with separate read and write clocks and enables |
| `can_register.sv` | 8-bit register with write enable |

All logic runs on the single clock `clk` with a synchronous, active-high `rst`. The RAM keeps its
separate read and write clock ports, but inside the FIFO both are tied to `clk`.

## Bit timing

A bit is divided into time quanta. One quantum is `baud_r_presc + 1` clock cycles. One bit is:

    SYNC (1 quantum) + TSEG1 (time_segment1 + 1 quanta) + TSEG2 (time_segment2 + 1 quanta)

The bus is sampled at the end of TSEG1. `tx_point` marks the start of each bit; the bit stream
processor changes `tx` only there. Example: with BTR0 = 0x41 and BTR1 = 0x24, a quantum is 2
clocks and a bit is 1 + 5 + 3 = 9 quanta, so 18 clocks.

Synchronisation uses only recessive-to-dominant edges. The logic looks at the line once per
quantum.

- **Hard synchronisation.** While the bus is idle or in intermission, an edge restarts the bit.
  The quantum that held the edge becomes SYNC. This aligns every node on the start-of-frame bit.
- **Resynchronisation.** Inside a frame, at most once per bit:
  - an edge that arrives late (in TSEG1) lengthens TSEG1;
  - an edge that arrives early (in TSEG2) shortens TSEG2;
  - each by the measured phase error, limited to `sync_jump_width + 1` quanta.
  - No resync happens while the node itself is sending a dominant bit, or when the previous
    sampled bit was dominant.
- **Triple sampling** (BTR1 bit 7). The sampled bit is the majority of the last three quantum
  samples, so a one-quantum glitch at the sample point is ignored.

Because edges are seen with one-quantum resolution, clock mismatch between nodes must stay within
what SJW can absorb between edges. Stuffing guarantees an edge at least every 10 bits.

## Frames and the bit stream processor

`can_bsp` handles one bus bit per `sample_point` and drives the next bit at `tx_point`. It follows
the CAN 2.0A (standard) and 2.0B (extended) data and remote frame formats:

    SOF | ID[10:0] | RTR | IDE=0 | r0 | DLC | data | CRC(15) | del | ACK | del | EOF(7) | 3 idle
    SOF | ID[28:18] | SRR | IDE=1 | ID[17:0] | RTR | r1 | r0 | DLC | data | CRC ...

How the pieces fit together:

- **Every node receives every frame**, including the frames it sends. The transmitter is simply
  the node that started the frame. It compares each bit it sends with the bus. Inside the
  arbitration field (ID, SRR, IDE, RTR), sending recessive and reading dominant means lost
  arbitration: the node continues as a receiver and its request stays pending. Anywhere else, a
  mismatch is a bit error.
- **Stuffing.** From SOF to the end of the CRC, after five equal bits the sender inserts one
  complementary bit. Receivers drop it. `can_stuff` counts the run and flags the next bit as a
  stuff bit. If that bit has the run's value, that is a stuff error.
- **CRC.** The CRC covers SOF through the last data bit. The generator polynomial is
  x^15 + x^14 + x^10 + x^8 + x^7 + x^4 + x^3 + 1 (0x4599). A frame followed by its CRC divides
  exactly, so the receiver compares its own remainder with the received one.
- **Acknowledgement.** The transmitter sends the ACK slot recessive. Every receiver that found the
  CRC correct drives it dominant. A transmitter that sees it recessive has an ACK error.
- **Error frames.** Any error starts an error frame at the next bit:
  1. six dominant bits if the node is error active, or six recessive bits if it is error passive
     (a passive flag cannot disturb other nodes);
  2. the node waits for the bus to become recessive;
  3. eight recessive delimiter bits and the intermission follow.

  Other nodes see six dominant bits as a stuff error, so one node's error flag destroys the frame
  everywhere. The transmitter then retries.
- **Overload frames.** A node that sees a dominant bit where the bus should be idle sends an
  overload flag of six dominant bits, followed by the same wait and 8-bit delimiter. This applies
  in the first two intermission bits, or for a receiver in the last EOF bit. The flag is dominant
  even for an error-passive node, and no error counter changes. A dominant third intermission bit
  is taken as the start of a new frame.
- **Suspend transmission.** An error-passive node that sent the previous frame waits eight extra
  recessive bits after the intermission before it may start again. Error-active nodes therefore
  get the bus first.
- **Frame acceptance.** After the sixth EOF bit a received frame counts as valid (a dominant
  seventh EOF bit does not invalidate it for receivers). If the acceptance filter accepted the
  identifier, the message is written into the receive FIFO over the following clocks, byte by
  byte, in buffer layout. This happens while the bus is still in EOF and intermission.
- **Joining the bus.** After reset, after leaving reset mode or after bus-off recovery, a node
  waits for 11 recessive bits before it takes part.

The transmit side loads the whole message into a 104-bit shift register (ID to last data bit).
It shifts once for every non-stuff bit. The CRC is appended from the live CRC register.

Received data bytes fill an 8-bit shift register from the top. `can_ibo` then reverses the byte,
so that the first bit on the wire ends up as the most significant bit.

**Self test** (mode bit 2). A transmitter needs no acknowledgement and stores its own frame in
its receive FIFO. A single node can therefore send and receive a message on its own, with its
`rx` connected to its `tx`.

## Error confinement

`can_eml` keeps a 9-bit transmit error counter (TEC) and an 8-bit receive error counter (REC).
The bit stream processor sends one-clock pulses:

| Event | Effect |
|---|---|
| error while transmitting | TEC + 8 |
| error while receiving | REC + 1 |
| frame sent successfully | TEC - 1 |
| frame received successfully | REC - 1 |

Counters never go below zero.

State changes:

- **error active → error passive** when either counter exceeds 127;
- **error passive → error active** when both are below 128 again;
- **bus off** when TEC exceeds 255. The node stops driving the bus.
- **bus off → error active** after 128 sequences of 11 recessive bits. Both counters are then
  cleared.

## Acceptance filter and receive FIFO

`can_acf` compares the received frame with four acceptance code bytes. Where an acceptance mask
bit is 1, that bit is "don't care". The result `id_ok` is registered at the CRC delimiter. It is
cleared at intermission, at an error frame and in reset mode.

| Mode | What is compared |
|---|---|
| basic (mode bit 1 = 0) | code 0 / mask 0 against ID[10:3] |
| single filter, standard frame | all four bytes against ID, RTR and the first two data bytes |
| single filter, extended frame | all four bytes against the 29-bit ID and RTR |
| dual filter | two shorter filters; either may accept |

`can_fifo` stores accepted messages in the 64x8 RAM as a circular buffer. A second 64-entry
memory holds each message's length. Behaviour:

- The host always sees the oldest message in the receive window at addresses 32..44.
- Writing the release command frees that message.
- `info_cnt` (address 3) counts complete messages.
- A message that does not fit is dropped whole and sets `overrun`. Messages already stored stay
  intact.
- Reset mode empties the FIFO.

## Host interface

These are synchronous registers on `clk`:

- With `cs` and `wr` high, `data_in` is written to `addr`.
- With `cs` and `rd` high, the addressed byte appears on `data_out` one clock later.

| addr | register |
|---|---|
| 0 | mode: bit0 reset mode (set after reset), bit1 extended filter mode, bit2 self test, bit3 single filter |
| 1 | command (write): bit0 transmit request, bit2 release receive buffer, bit3 clear overrun |
| 2 | status: bit0 message available, bit1 overrun, bit2 transmit buffer free, bit3 transmission complete, bit4 receiving, bit5 transmitting, bit6 error passive, bit7 bus off |
| 3 | number of messages in the FIFO |
| 4 / 5 | REC / TEC[7:0] |
| 6 | bus timing 0: {SJW[1:0], baud_r_presc[5:0]} |
| 7 | bus timing 1: {triple sampling, TSEG2[2:0], TSEG1[3:0]} |
| 8..11 / 12..15 | acceptance code 0..3 / acceptance mask 0..3 |
| 16..28 | transmit buffer |
| 32..44 | receive window (oldest message) |

Buffer layout, identical in both directions:

1. Frame info byte: {IDE, RTR, 0, 0, DLC[3:0]}.
2. Identifier bytes:
   - standard frames, 2 bytes: ID[10:3], {ID[2:0], 00000};
   - extended frames, 4 bytes: ID[28:21], ID[20:13], ID[12:5], {ID[4:0], 000}.
3. Up to eight data bytes. A DLC above 8 sends 8 bytes.

Some registers are locked outside certain conditions:

- Mode, bus timing and acceptance registers can only be written in reset mode.
- The transmit buffer can only be written while no transmission is pending.

A typical start-up: write the bus timing and acceptance registers, then clear mode bit 0. The node
then waits for 11 recessive bits and joins the bus.

## What comes from the reference description and what is this design's own

These follow the controller description this design was built from:

- the split into the blocks listed above;
- the arbitration procedure;
- stuffing after five equal bits;
- the CRC-15 polynomial and its shift-register form;
- the ACK and end-of-frame rules;
- the error-state diagram with its 127 / 255 / 128 x 11 limits;
- the two-register bit timing set-up and the signal names of the bit timing logic and acceptance
  filter;
- the 64x8 two-port RAM (separate read and write clocks and enables) used for the receive buffer;
- the bit-order reversal block and the 8-bit register.

These are this design's own choices:

- The register map, the command and status bits and the buffer byte layout. They are modelled on
  the SJA1000 register set, whose bit timing and filter fields the description uses.
- The exact encodings: quantum = `baud_r_presc + 1` clocks, segments = field + 1.
- The filter match rule, which is the SJA1000 one.
- The counter step sizes. These are the CAN standard's.
- The error flag and delimiter lengths, the intermission, the overload frame and the
  suspend-transmission time. These are also the CAN standard's; the description only names the
  overload signal.
- A single clock for the receive FIFO. The description also mentions a FIFO between two
  asynchronous clock domains, but its FIFO has one clock input.
- The transmit buffer and the shift registers are made of flip-flops. The RAM is used only for
  the receive FIFO, because the bit stream processor needs the whole transmit message in
  parallel.

Not implemented:

- **The transceiver and the host processor**, which are outside the controller.
- **A FIFO between two asynchronous clock domains.** The receive FIFO runs on the controller's
  single clock.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_can_crc` | Reference values of a short bit stream; random streams against long division over GF(2); zero remainder after appending the CRC |
| `tb_can_stuff` | Random streams against a reference stuffer; stuff error on a sixth equal bit |
| `tb_can_btl` | Bit length; sampling of frames sent off the nominal rate, so that resync is needed; hard sync; triple-sampling glitch rejection. Two settings: 16 clocks per bit, and prescaler 56 / TSEG1 3 / TSEG2 1 / SJW 1 with triple sampling (399 clocks per bit, frames at ±23 clocks per bit) |
| `tb_can_brp`, `tb_can_register`, `tb_can_ram`, `tb_can_ibo` | Timing and contents against shadow models. The RAM test uses unrelated read and write clocks |
| `tb_can_acf` | Random frames, codes and masks against a reference of the filter rule in all modes |
| `tb_can_eml` | Counter steps, every state transition, bus-off recovery after exactly 128 sequences |
| `tb_can_fifo` | Queue behaviour, release, overrun with earlier messages intact, reset |
| `tb_can_bsp` | Two bit stream processors on an ideal bit clock; details below |
| `tb_can_top` | Three complete controllers on a wired-AND bus, programmed through the host interface; details below |

`tb_can_bsp` compares every bus bit of 40 random standard and extended frames against a frame
built independently by the testbench. It also covers:

- arbitration;
- missing acknowledgement, with active and passive error flags;
- the exact 25-bit gap before an error-passive retry (6 flag + 8 delimiter + 3 intermission + 8
  suspend);
- an injected disturbance with retry;
- both kinds of overload frame.

`tb_can_top` runs the following scenarios. The two nodes use different prescaler/segment
settings that give the same bit rate.

- standard, extended and remote frames;
- arbitration between two nodes;
- filter rejection;
- an injected bit error;
- a CRC error seen by one receiver only;
- FIFO overrun;
- self test;
- repeated ACK errors through error passive and bus off, and back by recovery;
- an overload frame at both nodes.

It counts every mechanism and fails if one never occurred. It runs the top module with its
default parameters.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/can_pkg.sv tb/tb_can_top.sv \
          --top-module tb_can_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Use the same command with another `tb_*.sv` file and its module name for any other testbench.
`-Irtl` lets Verilator find the modules by file name. Every testbench finishes in well under a
second.
