# Fault-tolerant ring baseband channel with token bidding and shift addressing

A local network of computers joined in a one-way ring. Each computer has a
controller; the controllers pass half-bytes (4-bit nibbles) from one to the
next. Three ideas carry the design:

* **Half-bytes in a 3-of-6 code.** Each segment between neighbours carries one
  word of the 3-of-6 constant-weight code (exactly three of six wires high)
  per handshake, separated by an all-zero spacer. A receiver knows a word is
  complete when three wires are high, however skewed the wires are. Of the 20
  words, 16 carry half-bytes and 4 are tokens T1..T4 that steer the protocol.
* **No address decoders.** The address field is unitary (one bit per
  controller, counted from the sender). Every controller takes the top bit of
  the address byte as its own "chosen" marker, shifts the byte one place
  towards the top and passes it on. The next controller therefore finds its
  own bit on top. The message ends with an end word that travels round the
  ring the same way, and every controller shifts its receipt bit into it.
  The sender gets the end word back, so it learns who received the message.
* **Spare lines.** A segment has nine wires: six information lines, one
  acknowledgment line and two spares. When a line fails, all lines above it
  move down one place and a spare fills the gap, so a segment survives two
  failed lines.

The RTL is a clocked, synthesizable model of this channel. The original
adapters are self-timed. Here every block runs on one clock, but the segment
protocol still uses the code-word / spacer handshake on the wires.

## Structure

```
ring_channel_top             N_NODES controllers in a loop, segment i: node i -> node i+1
└── ring_controller          one controller (without the computer's bus interface)
    ├── msg_fifo  (FIFO1)    bytes from the computer, waiting to be sent
    ├── msg_fifo  (FIFO2)    bytes taken off the ring, waiting for the computer
    └── channel_adapter      bidding, forwarding, reception, address/end-word shifting
        ├── oec_link_rx      upstream segment: 3-of-6 completion, decode, acknowledge
        ├── oec_link_tx      downstream segment: encode, spacer handshake
        └── ca_tx_ctrl       the master's message transmission
ring_pkg                     symbol/byte types, code table, line-reserve mapping
```

Each controller's computer-side signals come out of the top as arrays
indexed by controller:

* FIFO1 write: `f1_wr`, `f1_din`, `f1_full`, `f1_ovf`.
* FIFO2 read: `f2_rd`, `f2_dout`, `f2_empty`, `f2_err`, `f2_ovf`.
* Control inputs: `is` (initial set), `ts` (token set), `isf1`/`isf2`
  (empty FIFO1/FIFO2), `disc` (disconnect from the ring).
* Status outputs: `ff1`, `ff2`, `fa`, `bid_state`, `chosen`, `prio`.

A computer bus interface (for example a Q-bus controller) would sit on these
signals. It is not part of the RTL.

## Message formats

Bytes are 9 bits wide: 8 data bits plus a tag bit (`fbyte_t.last`). The tag
is 1 only on the last byte of a message.

| In FIFO1 (written by the sender's computer) | |
|---|---|
| header | low half = priority Nc (0..15), high half = number of address bytes (must be 1) |
| address | unitary: bit 7 = next controller downstream, bit 6 = the one after, ... bit 8-N = the sender itself |
| information bytes | any number; tag 0 |
| last byte | tag 1; sent like an information byte |

| In FIFO2 (read by a receiving computer) | |
|---|---|
| state byte | `{Nc, 2'b00, master, recipient-bidder}` of the receiving controller; tag 0 |
| information bytes | including the sender's last byte, all tag 0 |
| end word | receipt bits, tag 1 (see below) |

The controller finds the end of a message by the tag alone. It does not count
bytes and does not check checksums; both are left to the software above.

## What goes over a segment

`ring_pkg::oec_encode` numbers the 20 weight-3 six-bit values in increasing
order. Index 0..15 is the half-byte of that value; 16..19 are T1..T4.

Handshake on one segment (`oec_link_tx` -> `oec_link_rx`):

1. The transmitter drives a code word on the six information lines.
2. When the receiver sees weight 3 and has room, it latches the decoded
   symbol and raises the acknowledgment line.
3. The transmitter returns the lines to all zeros (the spacer).
4. The receiver sees weight 0 and drops the acknowledgment. The transmitter
   may now send the next word.

The receiver holds one symbol. It does not acknowledge the next word until
the adapter has taken the held one. This makes the ring an asynchronous
pipeline with one place per controller. A handshake takes 2 cycles when the
far end is ready. A full ring moves about one half-byte every 5.2 cycles.

**Line reserve.** `fail_mask` (9 bits, one per physical line) says which
lines are out of service. Logical line *j* (0..5 information, 6
acknowledgment) uses the *j*-th healthy physical line. Both ends of a segment
must hold the same mask. In the top, `seg_fail_mask[i]` feeds both ends of
segment i. The lines are bidirectional: after a shift, the line that carried
the acknowledgment may carry information. The wire is modelled as the OR of
what both ends drive.

**Line fault detection.** Each link end raises `fa` (sticky until initial
set) in either case:

* it sees a word of weight 4 or more;
* a wait that should end quickly lasts `TMO` cycles: a partial word (weight
  1 or 2), a spacer that never comes, or an acknowledgment that never rises
  or never falls.
* `fail_mask` marks more than two lines. Two failed lines are covered by
  the spares. A third can only be reported: the segment stops.

A stuck-at-1 line shows up as a spacer that never arrives. A stuck-at-0 line
shows up as a word that never completes.

## Bidding for the channel

Bidding uses a circulating token with priorities. `bid_state` gives each
controller's position:

| state | meaning |
|---|---|
| `B_S0` (0) | initial |
| `B_S0P` (0') | lost the last bid; bids again at the next chance, with Nc already known |
| `B_BID` (1/2) | bidder |
| `B_OBS` (3) | observer (no request this round) |
| `B_MASTER` (4) | won; transmits and receives its own message |
| `B_REC_BID` (5) | recipient that still wants the channel |
| `B_REC_OBS` (6) | recipient without a request |

1. **Start.** One controller gets `ts`. It sends T1, which offers the channel.
   After every message, the master sends the next T1.
2. **T1 arrives.** A controller with a request (FIFO1 not empty) takes the
   header byte out of FIFO1. It sends **T2, Nc** instead of T1 and becomes a
   bidder. A controller in 0' uses its stored Nc. Any other controller passes
   T1 on.
3. **T2, N arrives at a non-bidder.** With a request, it joins as a bidder
   and sends **T2, max(N, Nc)**. Without one, it becomes an observer and
   passes T2, N on.
4. **T2, N returns to a bidder.** If N > Nc, a higher bidder exists, so it
   passes T2, N on. If N = Nc, it has the highest priority: it sends **T3**
   and becomes master. With equal priorities, the first such bidder that the
   returning T2, N reaches wins.
5. **T3 travels round.** Observers become recipient-observers. Bidders become
   recipient-bidders. All of them start address reception. The master starts
   its message immediately after T3 and also receives T3 when it returns.
6. **After the message.**
   * A recipient-bidder adds 1 to its Nc (saturating at 15) and goes to 0'.
     A request that keeps losing therefore climbs until it wins.
   * Everyone else goes to 0.
   * The master sends T1 once it has both sent its message and received the
     whole of it back.

## Transmission, addressing and the end word

Sequence sent by the master (`ca_tx_ctrl`), right after T3:

```
addr.lo addr.hi  info0.lo info0.hi ...  last.lo last.hi  T4  0  0
```

Every byte goes low half first. The two zero half-bytes after T4 become the
end word.

Steps at every receiving controller except the master:

* **Address low half.** Latch its top bit h. Send `{lo[2:0], 0}`.
* **Address high half.** The top bit is this controller's marker CH. Send
  `{hi[2:0], h}`. If CH = 1, write the state byte to FIFO2.
* **Information half-bytes.** Pass them on unchanged. If CH = 1, write each
  completed byte to FIFO2 with tag 0. A T4 ends this part.
* **End word.** Shift it in the same way, but put CH (not 0) in at the
  bottom. If CH = 1, write the shifted end word to FIFO2 with tag 1. Then
  clear CH.

The master runs the same reception steps on its returning message, but
forwards nothing. It is the last controller the message passes, at position
N, so address bit 8-N addresses the master itself. A master that addresses
itself gets its own message in FIFO2. Its end word then holds one receipt
bit per controller: bit N-k is controller k (counted from the master). A bit
is 1 if that controller was chosen and stored the message without error.

Example with 8 controllers and address `0x55`: controllers 2, 4, 6 and 8 (the
master) are chosen. The master's end word comes back as `0x55`, and
controller 4 stores `0x05`.

The addresses are relative to the sender. Mapping them to physical stations
is left to software.

**Disconnection.** While `disc` is high, a controller only repeats symbols.
It does not bid, store or shift, so for addressing it no longer exists:
every controller after it moves up one position. A message from controller
6 in an 8-controller ring with controller 3 disconnected is an example.
Controller 1 is now at position 3 and the sender at position 7. Address bit
0 then belongs to nobody. Change `disc` only while the ring is idle or being
restarted.

## Faults and recovery

| flag | raised when | cleared by | what the controller does |
|---|---|---|---|
| `ff1` | the FIFO1 head byte fails its parity check while the master fetches it | `isf1` | the byte is not sent; the message closes at once with T4, 0, 0 |
| `ff2` | a FIFO2 write finds FIFO2 full (the byte is lost; `f2_ovf` pulses) | `isf2` | CH is cleared: nothing more is stored, and the end-word bit shows non-receipt |
| `fa` | line fault on either segment of this controller | `is` | none; the computer must set the line masks and restart |

Repair sequence used in the end-to-end test:

1. Mark the failed line in `seg_fail_mask`.
2. Pulse `is` on every controller.
3. Pulse `ts` on one controller. The test uses controller 2 here, not
   controller 0 as at start-up: any controller can act as a second
   initiator.

Retransmitting a lost or truncated message is left to the computers.

## Where this RTL departs from, or adds to, the source design

* **Clocked, not self-timed.** Everything runs on one clock. The FIFOs are
  ordinary synchronous FIFOs, and the bus handshakes are one-cycle strobes.
* **Encodings chosen here:** the code-word table, the line order (0..5
  information, 6 acknowledgment, 7..8 spare), the state-byte contents, and
  priority in the low half of the header.
* **One address byte.** This limits the ring to 8 controllers; the header's
  address-byte count is not used.
* **Priority step.** A controller that lost a bid raises its priority by 1
  per message.
* **When the master sends T1.** Only after its own message has come all the
  way back.
* **Error checks chosen here.** The FIFO error checks (parity, overflow) and
  the line-fault timeout `TMO` belong to this design.
* **Not built:**
  * the algorithm that locates a failed line and switches the reserve
    automatically (`seg_fail_mask` is an input instead);
  * the line-repair signalling to the computer;
  * how a disconnect request reaches `disc`, and a physical bypass of a dead
    controller (`disc` only makes a working controller transparent);
  * the automatic hand-over of the starting role to a second controller
    (any controller can be given `ts`);
  * the computer's bus interface.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `N_NODES` | 8 | top | controllers in the ring (at most 8 with one address byte) |
| `FIFO_DEPTH` | 64 | top, controller | FIFO1/FIFO2 entries (power of two) |
| `TMO` | 64 | top, controller, adapter, links | cycles before a stuck handshake raises `fa` |

## Simulating

Each testbench in `tb/` checks its own results. It prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if the design hangs.
Build one with Verilator 5, for example the whole ring:

```
verilator --binary --timing --assert -Irtl rtl/ring_pkg.sv rtl/*.sv \
    tb/tb_ring_channel_top.sv --top-module tb_ring_channel_top -o sim
./obj_dir/sim
```

| testbench | covers |
|---|---|
| `tb_msg_fifo` | random traffic against a queue model; full/empty, overflow, parity error via `force`, clear |
| `tb_oec_link_tx` | code words against an independent table; failed-line masks; handshake period; missing acknowledgment |
| `tb_oec_link_rx` | skewed words, decoding, back-pressure stall, weight-4 word, stuck partial word |
| `tb_ca_tx_ctrl` | byte-to-half-byte order, T4 and zero half-bytes, FIFO1 error closing the message |
| `tb_channel_adapter` | every bidding transition, addressed and unaddressed reception, shifting, master absorbing its message, priority increment, FIFO2 full, disconnection |
| `tb_ring_controller` | one controller looped onto itself, sending to itself through a failed-line mask |
| `tb_ring_channel_top` | the full-size ring; see below |

**`tb_ring_channel_top`** runs the 8-controller ring at its default
parameters:

* contention with equal priorities;
* one-to-one, one-to-many, one-to-all and self-addressed messages;
* a segment running on its spares with two stuck lines;
* a FIFO2 overflow;
* a FIFO1 error part-way through a message;
* a stuck line found and repaired;
* a controller disconnected and reconnected.

It checks every received message, its state byte and its end word against a
model. It also counts each mechanism above and measures the half-byte rate.
It finishes in about 5,400 cycles.
