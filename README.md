# A fiber-linked timing network for gravitational-wave detector sites

Every board of this network counts the same oscillator cycles inside the same GPS second,
however far it sits from the master. A single bidirectional optical fiber per link carries:

- the frequency reference,
- the start-of-second mark,
- the GPS second number,
- network addresses,
- flow control,
- data in both directions.

The boards form a tree:

- The **Master-Fanout (MFO)** is the root. It has a GPS receiver, a reference 1PPS and a serial link to a PC.
- **Fanouts** are routers with 16 downstream ports each.
- **Slaves** are the leaves, next to the equipment that needs time-stamps.

Each board runs from its own 2^26 Hz (~67 MHz) oscillator, which an analog PLL locks to the 2^23 Hz carrier arriving on the uplink. Every clock in the tree therefore has exactly 2^26 cycles per second. The logic here has one job: make the cycle counters of all boards start the second together, within 1 µs, even though fibers across a 4 km site delay the signal by tens of µs.

The key idea is to send the start-of-second early. A Fanout measures the round trip of each downstream fiber. It then sends that port's start-of-second mark half a round trip ahead of its own second, so the mark arrives exactly on time.

This repository holds synthesizable SystemVerilog for the FPGA logic of both board kinds. It also holds a self-checking testbench for every module, and an end-to-end test of a three-level network.

## Line code: information in the falling edge

The link runs at 2^23 symbols/s, so a symbol lasts 8 clock cycles. Every symbol starts with a rising edge on a fixed grid: that regular edge is what the PLL locks to. Information sits only in where the line falls again:

| high cycles | pattern (8 samples) | symbol |
|---|---|---|
| 2 | `11000000` | −1 |
| 4 | `11110000` | 0 |
| 6 | `11111100` | +1 |

- A binary 0 is the symmetric pulse.
- A binary 1 is an asymmetric pulse, and its sign alternates from one 1 to the next, so the line stays DC-balanced (`pwm_encoder`).
- Two asymmetric pulses of the same sign in a row never occur in data. The one exception is the start-of-second marker, **(+)(+)(−)(−)**, so `pps_detector` finds the marker without any framing.

`pwm_decoder` samples the line through a two-flop synchronizer and classifies each pulse by its length:

- 1–2 high samples → −1
- 3–5 → 0
- 6–7 → +1

It reports every rising edge, which is the bit timing the receiver uses. It raises loss-of-signal after `LOS_CYC` (64) cycles without an edge.

## Seconds, time slots and packets

`timebase` divides the second into 2^16 time slots of 1024 cycles. Each slot holds one 128-bit packet. Packets always start on a slot boundary and are sent most significant bit first.

Data packet:

| bits | field |
|---|---|
| 127 | flow-control tag (1 = hold) |
| 126..124 | address offset (depth in the tree) |
| 123..96 | 28-bit address, seven 4-bit port numbers |
| 95..32 | payload |
| 31..16 | packet identifier |
| 15..0 | CRC-16-CCITT (x^16+x^12+x^5+1, preset FFFF) over bits 127..16 |

The **1PPS packet** fills the last slot of every second. It differs from a data packet in three ways:

- Bits 31..28 carry the marker symbols instead of ordinary 1s and 0s.
- Bits 95..64 carry the GPS second that is about to start.
- Bit 63 carries a `locked` flag (see below).

The first rising edge after this packet is the start of the next second.

On the receive side, `packet_rx` has no framing until it sees a marker. From then on it closes a packet every 128 bits. It reports:

- the 1PPS packet, with its CRC verdict;
- the rising edge that begins the new second (`pps_edge`);
- every non-zero data slot, either as a good packet or as a CRC error.

An all-zero slot means idle. `packet_tx` loads the 1PPS packet or one queued data packet at each slot boundary. It computes the CRC and feeds `pwm_encoder` one bit every 8 cycles.

## The advanced second and fiber-delay calibration

Each fanout port (`fanout_channel`) runs its transmitter on its own clock, `t = cyc + adv`, where `adv` is that port's advance. Its 1PPS packet and the marker edge therefore leave `adv` cycles before the board's own second.

The board below synchronizes to the edge it receives. At the end of its next second it sends its own 1PPS packet back, the **return packet**. The fanout's `delay_calc` measures the time from its own send to the return edge, and stores half that round trip as `adv`. The two fibers are assumed equally long, and any fixed latency is split the same way. Plugging in a board therefore takes these steps:

1. The board syncs to the un-advanced edge, which puts it one fiber delay late.
2. The fanout measures the round trip and advances the port's packet by half of it.
3. The board now sees its edge early. After too many consecutive sync errors it resynchronizes, this time exactly on time.
4. Later measurements agree with the stored advance. They are still checked every second. The advance is changed again only after `REPEAT` (4) measurements in a row that differ by more than `TOL` (67 cycles = 1 µs).

Several details stop this loop from chasing its own tail:

- **`locked` bit.** A unit sets bit 63 of its return packet only while it is synchronized with no pending sync error. Round trips are measured only from locked returns, so a board that has not yet followed a new advance does not produce a false delay.
- **Pause after a reload.** After the fanout's own counter is reloaded, measurements pause for two second boundaries. A return packet composed before the reload would otherwise be misread.
- **Half-second limit.** A return edge more than half a second after the send is ignored.
- **Clean slot on a time jump.** `packet_tx` remembers which slot it started. If the channel clock jumps out of that slot (new advance or reload), the rest of the slot goes idle. A 1PPS packet is therefore never sent twice or cut short. A data packet that was in flight at that moment is lost.

## Resynchronization and sync errors

`sync_verifier` compares each received start-of-second edge with the local counter.

An edge is in sync if it arrives within one cycle of the local second. An edge that misses is a sync error. The counter is reloaded from the edge in three cases:

- after reset;
- after loss of the uplink;
- after more than `MAX_SYNC_ERR` (2) consecutive errors.

The limit is above 1, so one corrupted packet does not move the time base. The MFO takes its edge from the reference 1PPS input instead of the uplink.

## Dynamic addresses

Addresses are rebuilt every second by the 1PPS packets as they travel down (`addr_engine`).

- **MFO.** It has offset 000 and address 0.
- **Downstream ports.** For port *p* the 1PPS packet carries the board's offset + 1, with the nibble of that new level set to *p*. Offset 1 writes bits 27..24, offset 2 writes bits 23..20, and so on up to offset 7, which writes bits 3..0.
- **Receiving board.** It copies the address from its uplink 1PPS packet. A valid address sets its internal-addressing flag (IA).
- **Offset 000 from a non-master means "invalid".** The receiver clears its address and sends 000 downstream too. Loss of the uplink does the same, so a whole unplugged branch loses its addresses within a few seconds.
- **Depth limit.** A board at offset 7 has no nibble left for its ports, so it sends 000 below it.
- **Tree size.** The tree holds up to six Fanout levels under the MFO, with Slaves at level 7: 16^7 addresses.

Packets going **up** carry their source address. Packets going **down** carry their destination, and each Fanout routes them in one of three ways:

- If the address matches its own, the Fanout absorbs the packet.
- If the packet is addressed deeper, the Fanout forwards it to the port named in the next nibble.
- If the prefix does not match, or its own address is invalid, the Fanout reports a routing error.

## Flow control and transfer permission

A Fanout has 16 inputs but one uplink of the same rate. Its `data_manager` moves packets from the channels' one-packet buffers into a FIFO (`sync_fifo`, 64 packets) with round-robin arbitration.

- **AF / AE flags.** The FIFO raises almost-full (AF) above 75% and almost-empty (AE) below 25%.
- **Flow-control packets.** When either flag rises, `flow_ctrl` sends a flow-control packet down every port. Bit 127 set means hold; bit 127 clear means resume.
- **TC flag.** Each board below takes that bit into its transmission-clearance flag (TC).
- **TA flag.** Upstream transmission is allowed (TA) only when the address is valid and TC is clear.

Two further rules prevent data loss:

- **Framing first.** A board sends no data up before its first return 1PPS packet has gone out since synchronization. Until then the receiver above has no framing.
- **Backpressure on downstream packets.** Packets sent down from the PC side wait while the target port's buffer is still occupied.

## GPS time at the master

The MFO reads the GPS receiver's serial stream at 9600 baud, 8N1 (`uart_rx`).

1. `gps_ha_parser` finds the binary `@@Ha` message and keeps month, day, year, hour, minute and second.
2. `utc_to_gps` turns them into GPS seconds since 1980-01-06, plus a parameter `LEAP` (14 s) for the GPS−UTC leap seconds.
3. The second number rides down the tree in the 1PPS packets. Every board holds it as its time-stamp second.

Packets that reach the MFO's FIFO are streamed to the PC as 16 bytes each, most significant byte first (`pc_serial_out`, `uart_tx`).

## DC-imbalance test

The optical drivers are AC-coupled, so a long run of unbalanced pulses could shift the receiver's threshold. `dc_imbalance_tester` measures how far the link tolerates this. It deliberately breaks the alternation rule:

1. On `start` it sends 1024 symbols. Each 1 is a long (+1) pulse and each 0 a symmetric one. There is never a short pulse. The bits come from a 16-bit LFSR with seed `ACE1`.
2. The line leaves through one transmitter and comes back through a fiber on a second receiver.
3. Each returned symbol is decoded and compared with a second copy of the LFSR.
4. A difference, or a symbol that is still missing `RX_WAIT` (4096) cycles after the last send, lights `err` (the error LED) and counts in `err_cnt`.
5. The received string is buffered and then sent as 128 bytes to the serial monitor port. The first bit goes in the MSB of the first byte.

In the top the tester has its own line ports. In hardware they would be a spare fanout transmitter/receiver pair.

## Board structure

- **`fanout_fpga` (MFO or Fanout).** The role follows from whether its `gps_ok` and `refclk_ok` inputs are both high. It contains:
  - 16 `fanout_channel`s (encoder, decoder, marker detector, packet framer, delay calculator and packet buffer each);
  - the uplink receiver and transmitter;
  - address engine, FIFO, data manager and flow control;
  - second counter and sync verifier;
  - the GPS path and the PC serial output.
- **`slave_fpga`.** It contains:
  - the uplink receiver and transmitter;
  - sync verifier and second counter;
  - address register;
  - a one-packet holding register for the equipment's status and data packets.
- **`ligo_timing_top`.** It places one of each side by side, with all board I/O as ports. A network is built by connecting `fo_tx[p]`/`fo_rx[p]` of one copy to `up_rx`/`up_tx` of another through a fiber delay.

## Files

- **`rtl/`** holds one module per file:
  - `timing_pkg` (types, constants, CRC);
  - the blocks named above;
  - the top, `ligo_timing_top`.
- **`tb/`** holds:
  - `tb_<module>` for every module;
  - `fiber` (a pure delay line with a plug input);
  - `tb_util_pkg`;
  - two whole-network tests:
    - `tb_ligo_timing_top` uses a 2^14-cycle second and fast serial links. Its network is MFO + Slave, and a Fanout + Slave one level down, over fibers of 37, 123 and 58 cycles. It checks addresses, cycle-exact alignment of all four counters, GPS seconds, delay measurement, routing, flow control, the invalidation and recovery of an unplugged branch, and one DC-imbalance run. It counts each mechanism and fails any that never happened.
    - `tb_ligo_timing_full` runs the top at its default parameters: a real 2^26-cycle second, 16 ports and 9600 baud. It covers two full seconds with a 100-cycle fiber. It takes about 3 minutes in Verilator.

Every testbench prints `TB_RESULT checks=N failures=M` and has a cycle watchdog. To run one:

```
verilator --binary --timing -Wno-fatal rtl/timing_pkg.sv $(ls rtl/*.sv | grep -v timing_pkg) \
    tb/tb_util_pkg.sv tb/fiber.sv tb/tb_ligo_timing_top.sv --top-module tb_ligo_timing_top
./obj_dir/Vtb_ligo_timing_top
```

## Departures and open points

- **Additions to the protocol.** The original description does not have the `locked` bit, the measurement pause after a reload, the half-second limit, the idle rest-of-slot after a time jump, the framing-before-data rule or downstream backpressure. They were added because without them the delay calibration either never settled or lost packets in simulation.
- **Choices filled in here.** These are not specified by the source:
  - the CRC polynomial;
  - the position of the GPS second in the 1PPS packet;
  - the format of flow-control packets (identifier `FC00`);
  - the FIFO depth;
  - buffer depths;
  - the pulse-width thresholds;
  - the loss-of-signal time;
  - the repeat count for re-adjustment;
  - the leap-second count;
  - the `@@Ha` byte layout.
- **The transfer-allowed truth table.** Its printed table reads as if transmission occurred with IA low. The prose says that no upstream transmission happens without a valid address. This design follows the prose.
- **Not built:**
  - the oscillator and PLL;
  - GPS receiver, optical transceivers, RAM chip and Ethernet port;
  - the equipment attached to a Slave.

  In simulation all boards share one clock. Fibers are ideal delay lines, so the DC-imbalance test passes by construction in simulation. Only the hardware can show whether the AC coupling tolerates the unbalanced string.
- **Fixed latency.** The advance includes half of the fixed transmit/receive pipeline. Board clocks therefore align to the cycle only when both directions have the same latency, which is true for this RTL.
