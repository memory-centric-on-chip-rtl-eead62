# Memory-centric on-chip interconnection network with memory-borrowing network interfaces

Think of a chip where several processing elements (PEs) pass data to each other
as messages over an on-chip network. When a receiver is slow, the sender's
network interface (NI) runs out of output-queue space. A conventional NI then
stalls its PE until the queue drains. Here, each node also has a distributed
memory management unit (d-MMU) with a local cache, and that cache often has
unused blocks. The **efficient NI** asks the d-MMU for such a block and parks
the blocked packet there, so the PE can keep going. When the output queue has
room again, the NI reads the packet back. Parked packets leave in the order the
PE sent them.

The RTL models a four-node receiver for a wireless video entertainment system.
Node 0 is the wireless processing unit (WPU), node 1 the medium access control
(MAC), node 2 the LT-code decoder and node 3 the scalable video decoder (SVC).
Data streams WPU → MAC → LT → SVC. Each node has one efficient NI plus the
borrowing part of its d-MMU. The four NIs share one 4×4 wormhole crossbar. The
processing elements, the cache controllers and the memory hierarchy behind the
d-MMUs are not part of this RTL. Their signals are ports of the top module.

```
            PE wrapper (tx / rx bursts)            PE wrapper ...
                  │                                      │
   ┌──────────────┴───────────────┐                      │
   │ network_interface            │   n_buf_* / n_data_* │
   │  buffer_ctrl ── payload q.   │◄────────────────────►│ borrow_addr_gen (d-MMU)
   │      │        header q.      │   n_back_* / release │   valid/status search
   │  ni_sender (output queue 16) │                      │   address queue
   │  ni_receiver (input q. 32)   │                      │   borrow_mem 512 x 8 words
   └──────┬──────────────▲────────┘                      │
          │ req/pri/data │ transmit/type/data
          ▼              │
   ┌─────────────────────┴────────────────────────────────────────┐
   │ crossbar 4x4: one grant_arbiter per output, wormhole locking │
   └──────────────────────────────────────────────────────────────┘
```

## Packets and flits

Every flit is 34 bits: `{type[1:0], data[31:0]}`. The type is 0 for a header,
1 for a body flit and 2 for a tail flit. A packet is one header followed by 1
to 8 payload words. The last payload word is the tail flit. The burst-length
code `BL` is the number of payload words minus one.

The header word layout is this design's own choice (`ocin_pkg::header_t`):

| bits  | field      | meaning                                              |
|-------|------------|------------------------------------------------------|
| 31:30 | `dest`     | destination node                                     |
| 29:28 | `src`      | source node                                          |
| 27    | `mes`      | message-passing packet (always 1 from the NI)        |
| 26    | `addr`     | extended address field present (unused, 0)           |
| 25    | `rw`       | 0 = data, 1 = request                                |
| 24:23 | `pri`      | priority, 0 is highest                               |
| 22:20 | `bl`       | payload length − 1                                   |
| 19:12 | `msg_info` | message information, defined by the two PEs          |
| 11:0  | —          | reserved, 0                                          |

A queue slot holds one flit. "16-word output queue" therefore means 16 flits,
headers included.

## Crossbar (`crossbar`, `grant_arbiter`)

Each sender port uses this handshake:

1. The NI puts a header on `n_tx_data` and raises `n_tx_req` with the header's
   priority on `n_tx_pri`.
2. Each output port has a `grant_arbiter`. It looks at the headers aimed at
   that output. The lowest `pri` value wins. Equal priorities are decided by a
   per-output **grant order**: the input earliest in the list wins. After each
   grant the winner moves to the end of the list. For example, with order
   (1,2,3,0) and equal requests from 1, 2 and 3, input 1 wins and the order
   becomes (2,3,0,1). A header is only switched if the output is free and its
   receiver has room.
3. The header goes through in the arbitration cycle. `n_tx_grant` rises one
   cycle later and stays high for the whole packet. The output stays locked
   to that sender until the tail flit passes (wormhole switching).
4. While granted, the NI presents body and tail flits with `n_data_rdy`. One
   flit moves per cycle unless `n_stall` is high. The tail flit drops the
   grant and frees the output.

`n_stall` is combinational: the granted sender's destination has
`n_num_free` low. The switch has one register stage on its outputs
(`n_transmit`, `n_type_out`, `n_data_out`). So a flit may already be inside the
switch when the receiver fills up. The receiver covers this by lowering
`n_num_free` while it still has one free slot.

Latency through an idle switch: request in cycle *t*, header on the output
and grant at the sender in cycle *t*+1. Then one payload flit per cycle.

## The efficient network interface (`network_interface`)

`network_interface` joins three parts:

- `buffer_ctrl`: wrapper transmit side and the borrowing logic.
- `ni_sender`: output queue and crossbar sender port.
- `ni_receiver`: input queue and wrapper receive side.

### Transmit handshake with the PE wrapper

When `tx_ready` is high, the wrapper may start a burst. It holds `tx_out_valid`
for BL+1 cycles with one word per cycle on `tx_data`. During the burst,
`tx_out_bl`, `tx_dest`, `tx_pri`, `tx_rw` and `msg_info_out` stay steady. The
words collect in an 8-word **payload queue**, and `tx_ready` is low until the
packet has been placed. `tx_ready` low while the PE has a burst ready is what
the experiments count as *blocking*.

### Placing a packet: output queue or borrowed block

This is the core of the design. In the code:

- *Needed space* is header + payload flits.
- *Free space* is the output queue's free slots, less whatever the unloader
  (below) still has to write.

The sequence:

1. **Burst starts.** A burst is *blocked* if the free space is below the
   needed space, or if earlier packets are still parked in the d-MMU. Blocked
   bursts must be parked too, to keep their order. For a blocked burst,
   `n_buf_req` goes out at once, so the d-MMU searches for a free block while
   the payload is still arriving (2–8 cycles).
2. **Payload complete: check again.** The output queue may have drained in the
   meantime. If the packet now fits and nothing is parked, it goes to the
   output queue. If a request was pending, a one-cycle `n_release` withdraws
   it, and the d-MMU frees any block it had reserved.
3. **Otherwise park it** (write operation). The NI waits for `n_buf_grant`.
   It then sends all 8 payload words in one cycle (`n_data_valid` and the
   256-bit `n_buf_data`) and puts the header into the **borrowing header
   queue**. `tx_ready` rises again, so the PE continues although the output
   queue is still full.
4. **Read back** (read operation). The header queue may be non-empty. Once
   the output queue has room for the oldest parked packet, `n_data_req` is
   raised and held until `n_back_valid` brings the block back. The block
   arrives in the cycle after the d-MMU sees the request. Header and payload
   then go into the output queue.

A single **unloader** does every output-queue write, one flit per cycle:
header, body flits, tail. It only starts when the whole packet fits, so the
queue never overflows. The decision to read back may be taken while the
unloader still has two flits to write. The request is raised one cycle
later and the block comes back one cycle after that, by which time the
unloader is free.

`borrow_mode` is high while a request is out or packets are parked.
`BORROW_EN = 0` turns the NI into a conventional one: a blocked burst waits,
with `tx_ready` low, for room in the output queue. The experiments compare
against that mode.

### Sender port (`ni_sender`)

The output queue holds 16 flits by default. If its head flit is a header, the
sender requests the crossbar. When the grant arrives, it drops the header from
the queue. This leaves one idle cycle after each grant. It then streams the
rest of the packet, holding a flit during a stall.

### Receive side (`ni_receiver`)

Flits from the crossbar enter a 32-flit input queue. A packet goes to the
wrapper once two things hold:

- the whole packet is in the queue;
- the wrapper's `rx_cap` (free space, 8 meaning 8 or more) covers the burst.

Delivery takes one cycle to remove the header. Then `rx_in_valid` is high for
BL+1 cycles without gaps. `rx_source`, `rx_in_bl`, `rx_rw` and `msg_info_in`
stay steady during the burst. If the wrapper has no room, packets wait in the
input queue, and the crossbar back-pressures the sender.

## d-MMU borrowing address generator (`borrow_addr_gen`, `borrow_mem`)

Each d-MMU cache has two banks of four ways. Only blocks behind the **last
way** of each bank may be lent. That gives 2 × 256 = 512 blocks of 8 words
(16 KB per node), tracked by 512 cache valid bits (`cache_valid`, an input
from the cache controller). Each block also has a **status bit**, set while
the block is lent. The status bits go to the cache controller as
`borrow_status`, so it can mask lent blocks from its lookups. A block is empty
when neither bit is set.

The search works like this:

- A **search counter** selects one 128-bit window of the 512-bit table.
- An **empty detector** (a priority encoder) picks the lowest empty block in
  the window.
- If the window is full, the counter moves to the next window in the next
  cycle. A full sweep takes four cycles.
- The counter keeps its position between requests.

When a block is found, its status bit is set and `n_buf_grant` rises. The
payload that follows is written into `borrow_mem` in one cycle. The block
number enters an **address queue**, and the grant falls. A read request pops
the oldest block number, reads the block (one cycle) and clears its status
bit. At most `MAX_BLOCKS` blocks are lent at once. This is the "borrowing
size": 64 blocks = 512 words by default. Beyond that, the search waits until
a block comes back.

Timing from request to grant:

- idle → search: 1 cycle;
- each window searched: 1 cycle;
- grant: visible the cycle after the hit.

For example, if the first empty block lies in the second window, the grant
arrives three cycles after the request.

## Parameters

| parameter (top) | default | meaning |
|---|---|---|
| `N` | 4 | nodes / crossbar ports |
| `OQ_DEPTH` | 16 | NI output queue, flits |
| `IQ_DEPTH` | 32 | NI input queue, flits |
| `MAX_BLOCKS` | 64 | blocks a node may lend at once (× 8 words) |
| `NUM_BLOCKS` | 512 | lendable blocks per d-MMU (valid/status bits) |
| `WINDOW` | 128 | search window width, bits |
| `BORROW_EN` | 1 | 1: efficient NI, 0: conventional NI |

`ocin_pkg` holds the fixed formats: 32-bit data, 3-bit burst length (at most
8 words), 2-bit priority, 8-bit message information and 2-bit node IDs.
Besides the wrapper and cache-controller signals, the top brings out per
node `borrow_mode`, the number of lent blocks (`borrowed`), the number of
parked packets (`parked`), the output queue fill (`oq_level`) and the
crossbar stall line (`stall_seen`). Reset is synchronous and active high
(`rst`). Every module has one clock
(`clk`).

## How far it follows the original design

These parts follow the original description:

- The four nodes and their IDs.
- The NI–crossbar signal set, flit types, priority convention and stall/grant
  behaviour.
- Arbitration by priority with a rotating grant order.
- Wormhole switching.
- The wrapper transmit/receive signals and burst rules.
- The borrowing interface: request/grant/data-valid write, request/back-valid
  read, and release.
- The payload and borrowing header queues, and the second check of the output
  queue's free space once the payload is complete.
- The d-MMU's 512 valid bits, 128-bit search window with counter and empty
  detector, status bits, 8-word blocks written in one cycle, and the address
  queue.
- The default queue and borrowing sizes.

These are this design's own choices:

- The header bit layout.
- The exact cycle timing: the one-cycle switch stage, the idle cycle after a
  grant, the one-cycle read latency.
- The receiver's spare slot.
- Waiting for a whole packet before delivering it to the wrapper.
- The unloader.
- Priority taking precedence over the grant order.
- The search counter keeping its position between requests.
- Releasing only once the payload is complete (not in the middle of
  gathering it).
- Requests (`rw = 1`) sent like data packets.

Not included:

- The PEs and their wrappers.
- The d-MMU cache itself: tag tables, hit detection, refill, and the
  memory-access and MMU-operation ports.
- The centralized MMU and its cache, the DRAM controller, DRAM, and the power
  management.
- Parking received packets in borrowed blocks. Borrowing serves only the
  output queue. Packets that the wrapper cannot take yet wait in the input
  queue, which is the receive buffer on the memory side of the wrapper.
- The `cache_valid` bits are a plain input. They are assumed to change only
  through cache refills, which the cache controller must not make into blocks
  whose status bit is set.

## Simulation

Each testbench is self-checking. It ends with a line
`TB_RESULT checks=N failures=M` and has a cycle watchdog. To build and run one
with Verilator 5:

```
verilator --binary --timing --assert -y rtl +libext+.sv -Irtl \
    rtl/ocin_pkg.sv tb/tb_ocin_top.sv --top-module tb_ocin_top -Mdir obj_top
./obj_top/Vtb_ocin_top
```

| testbench | what it shows |
|---|---|
| `tb_grant_arbiter` | winner, priority and grant-order rotation against a reference model; the (1,2,3) example |
| `tb_crossbar` | one-cycle header latency; no flit switched to a full receiver; whole, in-order, non-interleaved packets; stalls, contention, parallel transfers |
| `tb_borrow_mem` | block write/read against a reference array |
| `tb_borrow_addr_gen` | exact block found and grant latency for window patterns; full sweep within 5 cycles; status bits; FIFO read back; release; lending limit |
| `tb_buffer_ctrl` | direct writes, parking with the request out the cycle after the burst starts, PE not held while the queue is full, ordered read back, release |
| `tb_network_interface` | one NI with its d-MMU against crossbar and wrapper models, both directions, random stalls and grant delays |
| `tb_ocin_top` | whole network at default sizes: 600 bursts along the WPU→MAC→LT→SVC stream plus random traffic, busy receivers; every packet delivered intact and in order; output-queue and parked-packet bounds held each cycle; stall, contention, full output queue, borrowing, read back, release and capacity waits all occur |
| `tb_ocin_blocking` | four networks on the same stimulus (conventional, and borrowing 16/32/48 words), MAC → LT with the LT wrapper busy 50/70/90 % of the time |
| `tb_ocin_random` | six networks on the same stimulus (output queue 16/24/32 flits, each conventional and with 512 borrowable words), all four PEs sending random traffic, every receiver busy part of the time |

Blocking cycles of the MAC in `tb_ocin_blocking` (300 bursts per rate):

| receiver busy | conventional | borrow 16 words | 32 words | 48 words |
|---|---|---|---|---|
| 50 % | 866 | 844 (−2.5 %) | 827 (−4.5 %) | 811 (−6.4 %) |
| 70 % | 2968 | 2956 (−0.4 %) | 2856 (−3.8 %) | 2838 (−4.4 %) |
| 90 % | 11591 | 11562 (−0.3 %) | 11545 (−0.4 %) | 11527 (−0.6 %) |

In every case borrowing reduces blocking, and more borrowed memory helps
more. The gains are a few percent: under steady overload, the parked packets
only add a fixed amount of buffering. These runs are much shorter than a real
workload. Their traffic is this testbench's own and does not reproduce any
published figure.

`tb_ocin_random` sends 1000 bursts from each of the four PEs. Each burst
has a random destination, priority and length. An idle PE starts a new
burst with the injection probability each cycle. Each receiver is busy in
a random share of 16-cycle slots.

PE blocking cycles (sum over the four PEs) at 35 % injection:

| receiver busy | queue 16: conv. / borrow | queue 24 | queue 32 |
|---|---|---|---|
| 55 % | 36495 / 31696 (−13.1 %) | 36148 / 31570 (−12.7 %) | 36181 / 31493 (−13.0 %) |
| 70 % | 68712 / 63519 (−7.6 %) | 66991 / 63306 (−5.5 %) | 67078 / 63196 (−5.8 %) |
| 85 % | 164566 / 158618 (−3.6 %) | 169515 / 158515 (−6.5 %) | 169460 / 158451 (−6.5 %) |

Cycles to deliver all 4000 bursts, with receivers busy 55 % of the time:

| injection | queue 16: conv. / borrow | queue 24 | queue 32 |
|---|---|---|---|
| 15 % | 18811 / 18096 | 18979 / 18096 | 18389 / 18096 |
| 20 % | 18678 / 18097 | 18224 / 18097 | 18825 / 18097 |

With borrowing, the output-queue size hardly matters: the borrowed blocks
take over its role. The relative gain shrinks as the receivers get busier.
Then the parked packets fill up early and stay that way, so they add a
fixed amount of buffering to an overload that keeps growing.
