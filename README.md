# CAN 2.0A controller for sensor nodes

This is a stand-alone Controller Area Network (CAN) controller in
synthesizable SystemVerilog. It lets a small sensor node join a CAN bus
without a microcontroller that has CAN built in. A host, which can be a
small state machine reading a temperature sensor, writes a message into a
ten-byte buffer and sets one command bit. The controller then does the rest
of the protocol work:

- builds the frame and computes its CRC;
- inserts stuff bits;
- arbitrates for the bus and checks the acknowledgement;
- signals errors and retransmits on its own.

It also receives every frame on the bus, checks it, acknowledges it,
filters it by identifier and keeps up to two messages for the host.

The controller handles standard (11-bit identifier) data and remote frames,
error and overload frames, bit timing with hard synchronization and
resynchronization, and fault confinement (error counters, error passive,
bus-off and recovery). It does not handle extended 29-bit frames.

## Block structure

The controller is split into the units of a classic CAN controller block
diagram. Each unit is one module:

```
              host register bus (cs, we, addr, wdata, rdata)
   +--------------+----------------+-----------------+-------------+
   |              |                |                 |             |
 parameter     transmit        command/status     receive       error
 registers     buffer (10 B)   (message proc.)    buffer 2x10B  counters
   |              |                                  ^
   |        data/remote frame                        |
   |        generator                       acceptance filter
   |              |                                  ^
   |        par-ser converter --> CRC gen    field extraction + CRC check
   |              |                                  ^
   |        bit stuff unit                    bit de-stuffing unit
   |              |                                  ^
   |   serialized frame transmitter <-- error/overload frame generator
   |              |                                  |
   +-------> bit timing logic (sample point, transmit point, sync)
                  |                                  |
               can_tx                             can_rx
```

The message processor (`can_msg_proc`) is the state machine that connects
all of this. The error management logic (`can_err_mgmt`) looks at every
sampled bit and reports errors to it.

| Module | Role |
|---|---|
| `can_controller` | Top level: host register map and wiring of all units |
| `can_pkg` | Frame field sizes, CRC polynomial, `mp_state_e` phase encoding, helper functions |
| `can_param_regs` | Acceptance code and mask, SJW, prescaler and segment lengths |
| `can_tx_buffer` | Ten-byte transmit buffer; locked while a request is pending |
| `can_frame_gen` | Turns the buffer into the unstuffed frame bits, SOF to the end of the data field |
| `can_par_ser` | Shifts out the frame bits, then the 15 CRC bits |
| `can_crc15` | Serial CRC-15. One instance generates the transmit CRC and one checks received frames |
| `can_bit_stuff` | Inserts a stuff bit after five equal bits and holds the serializer meanwhile |
| `can_serial_tx` | Picks what goes on `can_tx` for each bit |
| `can_btl` | Time quanta, bit segments, sample and transmit strobes, synchronization |
| `can_bit_destuff` | Removes stuff bits, detects stuff errors, extracts ID/RTR/DLC/data/CRC, finds the end of the CRC |
| `can_acc_filter` | Identifier filter using the code and mask |
| `can_rx_buffer` | Two ten-byte receive buffers, used as a FIFO, with an overrun flag |
| `can_err_mgmt` | Bit, stuff, CRC, form and ACK errors; arbitration loss; overload condition |
| `can_err_frame_gen` | Error and overload flags and delimiters; TEC/REC, error passive, bus-off |
| `can_msg_proc` | Bus phase state machine, transmission requests, retransmission, ACK decision |

## Bit timing and synchronization

This is the part that most needs care when changing parameters.

A time quantum lasts BRP+1 clock cycles. One bit time has three parts:

- Sync_Seg: one quantum.
- TSEG1 (Prop_Seg plus Phase_Seg1): TSEG1+1 quanta.
- Phase_Seg2: TSEG2+1 quanta.

The reset values are BRP=4, TSEG1=5 and TSEG2=2. That gives a 10-quantum,
50-clock bit, sampled at 70 %. With a 50 MHz clock this is 1 Mbit/s.

`can_btl` produces two one-clock strobes:

- `sample` at the end of TSEG1, with the bus level on `rx_bit`.
- `tx_pt` at the start of Sync_Seg.

The rest of the controller runs on these two strobes:

- Every decision about bit *n* is made on the `sample` strobe of bit *n*:
  the state update, the error checks, the stuffing and de-stuffing
  counters, and the choice of the next bit.
- `can_serial_tx` registers the level for bit *n+1* at the next `tx_pt`.

So `can_tx` holds one value for a whole bit time. The logic between the
sample point and the next transmit point has Phase_Seg2 (at least one
quantum) to settle, which is plenty.

Synchronization acts only on recessive-to-dominant edges of the
double-flopped rx line, at the next quantum boundary:

- **Hard synchronization.** While the bus is idle, or in the last
  intermission bit, an edge restarts the bit. The quantum in which the edge
  was seen becomes Sync_Seg.
- **Resynchronization.** In every other bit, and only if the previous
  sampled bit was recessive:
  - An edge inside TSEG1 is late. TSEG1 gets longer by the phase error,
    limited to SJW+1 quanta.
  - An edge inside Phase_Seg2 is early. Phase_Seg2 gets shorter by SJW+1
    quanta. If less than that is left, the bit ends at once.
- **A node that is driving dominant ignores late edges.** Its own edge
  comes back through the transceiver and the two synchronizer flip-flops
  about three clocks after it drove it. If the node used that edge, it
  would keep stretching its own bits.

The loop delay (three clocks plus the transceiver delay) must stay well
inside Phase_Seg1. With one clock per quantum (BRP=0) and a 10-quantum
bit, the delay uses up the whole sampling margin. Keep at least a few
clocks per quantum.

Only single sampling is built.

## A frame, bit by bit

`can_msg_proc` follows the bus through the phases of `mp_state_e`:

- **Integration.** After reset or bus-off it waits for 11 recessive bits.
- **Idle.**
- **Frame.** SOF through the CRC sequence: the stuffed region.
- **CRC delimiter, ACK slot, ACK delimiter.**
- **EOF.** Seven bits.
- **Intermission.** Three bits.
- **Error and overload frames.**

**Transmitting.**

1. Writing command bit 0 sets `tx_pending`.
2. On an idle bit, or on the last intermission bit, the message processor
   loads the transmit chain and sets `tx_active`. SOF goes out on the next
   bit.
3. `can_par_ser` gives the frame bits. While they pass, `can_crc15` absorbs
   them. After them, the serializer shifts out the CRC, which is final by
   then.
4. `can_bit_stuff` sits between the serializer and the line. After five
   equal bits it sends one complementary bit and does not advance the
   serializer. If the last CRC bit completes a run of five, one more stuff
   bit is sent.

**Receiving.** Every node de-stuffs what it reads, the transmitter too.

- `can_bit_destuff` numbers the frame bits from SOF (bit 0). It stores the
  fields as they pass, and from DLC and RTR it knows where the CRC ends.
- The bit that ends the stuffed region moves the state machine to the CRC
  delimiter. That bit is the last CRC bit, or the stuff bit after it.
- A receiver whose computed CRC matches drives the ACK slot dominant.
- A receiver reports `rx_ok` on the sixth EOF bit. If the filter accepts
  the identifier, the message goes into the receive buffer.
- A transmitter reports `tx_ok` on the seventh EOF bit. That clears the
  request.

**Arbitration.** In the arbitration field (ID bits and RTR) a transmitter
may send recessive and read dominant. It then becomes a receiver but keeps
its request. It starts again right after the intermission, so a lower
identifier always wins.

## Errors and fault confinement

`can_err_mgmt` checks each sampled bit against the current phase:

- **Bit error.** A transmitter reads back a level other than the one it
  sent. The ACK slot and lost arbitration are exceptions.
- **Stuff error.** Six equal bits in the stuffed region.
- **Form error.** A dominant CRC delimiter, ACK delimiter or EOF bit.
- **ACK error.** A transmitter reads a recessive ACK slot.
- **CRC error.** The computed and received CRC differ. As in the CAN
  standard, this is signalled after the ACK delimiter.

Any error starts an error frame on the next bit:

- An error-active node sends six dominant bits. An error-passive node sends
  six recessive bits.
- The node then waits for a recessive bus. That lets the flags of other
  nodes overlap.
- Then it counts eight recessive delimiter bits.

Overload frames use the same generator. They start on a dominant bit in
the first two intermission bits, or on a dominant last EOF bit seen by a
receiver. A dominant third intermission bit is taken as SOF.

A transmitter hit by an error keeps its request and sends the frame again.

The error counters work as follows:

- A transmit error adds 8 to TEC. A receive error adds 1 to REC.
- Each success subtracts 1.
- Above 127 the node is error passive.
- Above 255 TEC puts the node bus-off. The node drives recessive until it
  has seen 128 runs of 11 recessive bits. Then both counters are cleared
  and it integrates again.

## Host interface

The host bus uses synchronous writes and combinational reads, with 8-bit
data and 5-bit addresses. `rdata` is zero when `cs` is low.

| Addr | Dir | Content |
|---|---|---|
| 0 | W | command: bit0 transmission request, bit1 abort a pending request (not one already on the bus), bit2 release receive buffer, bit3 clear data overrun |
| 1 | R | status: bit0 message available, bit1 data overrun, bit2 transmit buffer free, bit3 last transmission complete, bit4 receiving, bit5 transmitting, bit6 error passive, bit7 bus-off |
| 2, 3 | R/W | acceptance code: ID[10:3]; {ID[2:0], 00000} |
| 4, 5 | R/W | acceptance mask, same layout; a 1 means "don't care" (reset: all ones, accept all) |
| 6 | R/W | {SJW-1 [7:6], BRP-1 [5:0]} (reset 0x04) |
| 7 | R/W | {0, TSEG2-1 [6:4], TSEG1-1 [3:0]} (reset 0x25) |
| 8, 9 | R | transmit error counter (saturated to 255), receive error counter |
| 10..19 | R/W | transmit buffer: ID[10:3]; {ID[2:0], RTR, DLC}; data bytes 1..8 |
| 20..29 | R | oldest received message, same layout |

Writes to the transmit buffer are ignored while a request is pending.

A typical transmission:

1. Write bytes 10..19.
2. Write 0x01 to address 0.
3. Poll status bit 2 (or the `tx_busy` pin) until the buffer is free again.

A typical reception:

1. Wait for status bit 0 (or the `rx_msg_avail` pin).
2. Read bytes 20..29.
3. Write 0x04 to address 0 to free the buffer.

If a third message arrives while both buffers are full, it is dropped and
sets the overrun bit.

The example message EE F1 means ID 0x777, RTR 1, DLC 1. It is a remote
frame whose CRC is 101001101000101 (0x5345). The unit and system tests
check that value.

## Simulating

Every testbench checks its own results. Each one ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. With verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl -y tb \
  rtl/can_pkg.sv tb/can_ref_pkg.sv tb/tb_can_controller.sv \
  --top-module tb_can_controller
./obj_dir/Vtb_can_controller
```

Replace the testbench name to run another one. Every unit has one, named
`tb_<module>`. `tb/can_ref_pkg.sv` is an independent reference model: it
builds frames, computes the CRC by polynomial long division and stuffs
bits. The testbenches compare against it.

- `tb_can_controller` runs three controllers on one wired-AND bus. Their
  clocks are 1 % apart, and all use the default parameters. The test goes
  through:
  - the example remote frame, checked bit by bit on the bus;
  - a data frame rejected by the acceptance filter;
  - arbitration;
  - both receive buffers filled, then an overrun;
  - an injected disturbance giving error frames and retransmission;
  - a CRC error seen by one node only;
  - a forced overload frame;
  - a lone node going through ACK errors, error passive, bus-off and
    recovery.

  It counts each of these mechanisms and fails if one never happened.
- `tb_can_sensor_node` runs a temperature sensor node that sends 20
  one-byte readings to a monitor node. The sensor is modelled as 10 mV per
  °C into an 8-bit converter with a 2.56 V reference. The test checks the
  data. It also checks that each frame lasts its length in bit times, to
  within 10 clocks. That margin covers one resynchronization step on the
  ACK edge.
- `tb_can_btl` checks the 50-clock bit period and the position of the
  sample point. It also checks error-free reception from a transmitter whose
  bit rate is off by ±1.5 %.

## How far it follows the original design, and what is left out

These parts follow the original design:

- the list of units and what each does;
- the ten-byte transmit buffer;
- the two ten-byte receive buffers;
- the 15-bit CRC;
- the bit-timing segments and SJW;
- the form, CRC and ACK checks;
- the transmit buffer header layout, which matches the example message.

These are this design's own choices, made where the original gives no
detail. They follow the CAN standard wherever the standard fixes them:

- the register map and the command and status bits;
- the bit-timing field widths and reset values;
- mask polarity, and a single 11-bit code/mask filter;
- FIFO use of the two receive buffers, and dropping the newest message on
  overrun;
- the simplified error counting;
- flag and delimiter lengths;
- the rule that a node driving dominant does not resynchronize on late
  edges.

Not built:

- 29-bit identifiers (CAN 2.0B). A frame with IDE recessive is treated as a
  base frame.
- Triple sampling.
- The 8-bit suspend-transmission delay of error-passive transmitters.
- The exceptions to the error counting rules. One example: the ACK error
  of an error-passive transmitter should not raise TEC.
- A node with a pending request joining a frame that another node started
  one bit earlier. It waits for the next frame instead.
- Interrupt outputs. Status is polled.
- The analog sensor and its converter. They belong to the host side and
  exist only as a testbench model.

Reception differs from the original in three small ways:

- The received RTR flag is stored as it was sent. The example remote frame
  reads back with RTR 1, where the original's reception trace shows 0.
- Received data bytes beyond the DLC read as zero.
- There is no separate "received data length" output. The host computes it
  from DLC and RTR.
