# Fugu second network: a serial token ring for deadlock recovery

Fugu is a multi-user multiprocessor with one main network that user programs can use
directly. A misbehaving program can stop draining its messages and fill that network,
which can deadlock every other program. Fugu breaks such deadlocks in system software:

- A timer detects a message handler that holds the network too long.
- The kernel then drains the network into memory.
- If the program's buffer fills, the kernel tells the sending nodes to deschedule their
  senders. These are throttling messages, and later reactivation messages.
- If node memory runs out, the kernel pages buffered messages out to another node, and
  in the end to a node with a disk.

All of this must work while the main network is jammed. So every node also has a small,
kernel-only **second network**. It carries only flow-control messages and overflow pages.
It must never deadlock itself, and it must tell the sender whether each message was
delivered, so that software can retransmit.

This repository holds the RTL of that second network. It is a unidirectional, bit-serial
token ring of **second-network controllers (SNCs)**, one per node, each with the register
interface the node's kernel uses. The processor, the main network, the timer and the
operating-system software are outside the RTL. The top level brings out each node's
processor bus as ports.

## How the ring works

There is one token on the ring. A node that has a message to send waits for the token and
then sends exactly one message. It then passes a new token downstream. Nodes that are not
sending copy every bit from their input to their output, one clock later.

### Frames

The line is 0 when idle. Every frame begins with a start bit of 1:

| bits | token frame | message frame |
|---|---|---|
| 0 | 1 (start) | 1 (start) |
| 1 | 0 (type = token) | 1 (type = message) |
| 2 .. 33 | – | header word, MSB first |
| 34 .. | – | 0 to 7 data words, MSB first |
| last | – | acknowledgement slot: sent as 0 |

A message with `L` data words is `3 + 32·(L+1)` bits long. The acknowledgement slot is at
bit `2 + 32·(L+1)`.

### Sending: seizing the token

A node that has been told to send sees a token arrive. It has already copied the start bit
downstream, because it could not yet tell the frame's type. It then drives **1 in place of
the token's type bit**, which turns the token into the start of its own message. So seizing
the token costs no extra cycle. After that, the node sends:

1. the header and data words, taken from its output buffer;
2. a 0 in the acknowledgement slot;
3. zeros, while its message travels round the ring.

### Acknowledgement without extra traffic

Every node follows every message frame that passes through it. Once the 32-bit header has
gone by, the node compares the header's destination field with its own ID. The node
accepts the message only if both hold:

- the destination is this node;
- its receiver was enabled when the frame began, and is still enabled.

On accepting, it writes the message into its input buffer. As the acknowledgement slot
passes, it drives a **1** into the slot. It then disables its own receiver and raises its
interrupt.

The message keeps going round the ring back to its sender. The sender removes the
message, reads the slot (1 = ACK, 0 = NACK) and **always** sends a fresh token next. A
destination whose receiver was disabled leaves the slot at 0. So does a missing
destination. Either way the sender gets a NACK.

Disabling the receiver on each arrival protects the input buffer. A second message cannot
overwrite one the kernel has not read yet: that message is NACKed instead. The sending
kernel retransmits it later.

```
bit at sender's output : 0      1      2 .. 33     34         35 ...
sender drives          : 1      1      header      0          0  0 ... 0     1      0
                         start  type   (L = 0)     ACK slot   quiet          new token
                                 (a token has 0 here)
destination, k hops on : sees every bit k clocks later; drives 1 in the ACK slot
sender input           : its own frame returns one ring trip later; the sender reads
                         the ACK slot, then drives the new token
```

### Timing and latency

Each controller samples its input on the rising clock edge. It loads its output register
on the falling edge. A bit therefore crosses one hop per clock, and neighbours get half a
clock of margin against clock skew.

A one-word message (a header only, enough for a throttling command with an 8-bit vector)
occupies the ring for 35 + N cycles. Before that comes the wait for the token, which is at
most about N + 2 cycles on an idle ring.

The testbenches measured these figures at N = 32:

| operation | cycles |
|---|---|
| one-word message, command to ACK (polling included) | 72–100 |
| 31 throttling messages from one node, one after another | 3042 |
| eight-word message (header plus 7 data words) | 305 |
| page of 800 words in 115 messages, receiver ready at once | 36 880 |
| same page, receiver taking 320 cycles per block | 73 889 |

The design budget for a one-word message is 145 cycles on a 32-node serial ring.
Throttling messages must reach all 31 senders within `Q_OVF / r_fill` cycles. With an
overflow buffer of 100 messages, filling at `1/100 − 1/1000` messages per cycle, that is
11 111 cycles. Both budgets are met with a wide margin.

At other ring sizes, a one-word message from node 1 to the last node took 45 cycles at
N = 4 and 293 cycles at N = 128. With every node sending a 3-word message at once, all
were delivered in 551 cycles at N = 4 and in 33 163 cycles at N = 128.

In the slower page transfer, every block sent while the receiver is still busy comes back
NACKed and is sent again.

## Programmer's view

Each node's kernel reaches its controller with loads and stores in four alternate address
spaces (ASIs). A user-mode access to any of them is blocked and raises `cpu_prot_trap`.

| ASI | resource | access |
|---|---|---|
| 0x58 | Output Message Buffer (OMB), 8 × 32 bit | read / write |
| 0x59 | Input Message Buffer (IMB), 8 × 32 bit | read only (stores ignored) |
| 0x5A | Machine Info Register (MIR) | read / write |
| 0x5B | Status/Command Register (SCR) | read = status, write = command |

`cpu_addr` (3 bits) selects the word in a buffer.

**Header (word 0 of a message):**

| bits | field |
|---|---|
| 31:30 | control bits (message type; type 0 = vectored) |
| 18:16 | number of data words that follow (0–7) |
| 14:7 | interrupt vector, or 8 bits of data |
| 6:0 | destination node |

All other header bits are unused.

**MIR:** bits 6:0 hold the node ID and bits 14:8 the machine size. A size of 0 means 128
nodes. Boot software writes the MIR once. A send to a destination at or above the machine
size is refused at once, with a NACK and no use of the ring.

**SCR read (status):**

| bit(s) | meaning |
|---|---|
| 16 | interrupt pending |
| 15:8 | vector of the message in the IMB |
| 7:6 | control bits of the message in the IMB |
| 5 | receiver enabled |
| 4 | a message for this node is in the IMB |
| 3 | waiting to send: a send is in progress |
| 2:0 | controller state |

The controller states are:

| code | state |
|---|---|
| 0 | idle |
| 1 | waiting for the token |
| 2 | sending |
| 3 | waiting for the message to return |
| 4 | releasing the token |
| 5 | idle, last message ACKed |
| 6 | idle, last message NACKed |

**SCR write (commands).** Write one bit at a time:

| bit | command |
|---|---|
| 0 | send the message in the OMB |
| 1 | enable the receiver; also clears the arrival interrupt |
| 2 | disable the receiver |
| 3 | generate a token: clear the line for one ring trip, then send the token (only while idle) |
| 4 | reset this controller's network state |

**Interrupt (`cpu_irq`).** The interrupt rises when a message arrives, and when a send
finishes with either ACK or NACK. The arrival part clears when the receiver is enabled
again. The send part clears when the SCR is read.

**Typical use:**

1. At boot, every node writes its MIR and enables its receiver.
2. One node issues the generate-token command. It waits until the state leaves 4
   (releasing) before it sends a message itself.
3. To send, write the header and data words into the OMB and issue the send command.
4. Wait for the interrupt, or poll until bit 3 clears, then read the state: 5 means ACK
   and 6 means NACK. On NACK, issue the send command again; the OMB still holds the
   message.
5. On arrival, read the IMB, then enable the receiver again.

**Starting and recovering the ring.** Generating a token also repairs a damaged ring. For
machine size + 2 cycles the node drops everything that reaches it, then sends the token.
A ring holds at most one bit per node, so every stray bit has passed the node by then.
This relies on the MIR size being the number of nodes actually in the ring.
That includes:

- a second token;
- the remains of a frame that was cut when a controller was reset in the middle of it.

Afterwards exactly one token circulates. The recovery procedure is:

1. Every kernel resets its controller. The resets need not happen at the same time. A
   reset controller stops sending, and its receiver is off, so it puts no new bits on
   the ring.
2. One node generates the token.
3. Every node enables its receiver again.
4. Each kernel resends the message it had in flight. Its OMB still holds the message.

The OMB is not locked by hardware while a message goes out. Kernel code must own it, for
example through a software semaphore, from the send command until bit 3 clears.

## Controller structure (`rtl/`)

| file | role |
|---|---|
| `fugu_sn_pkg.sv` | ASIs, header/MIR/status structs, state codes, command bits, frame constants |
| `fugu_sn_ring.sv` | **top**: `N_NODES` controllers in a ring, per-node processor ports as arrays |
| `snc.sv` | one node's controller, wiring the five units below |
| `snc_proc_if.sv` | Processor Interface Unit: ASI decode, supervisor check, MIR, command pulses, read mux |
| `snc_data_module.sv` | OMB and IMB; processor word port, send-unit read port, receive-unit byte write port |
| `snc_send_unit.sv` | Sending Unit: serialises OMB word 0 and then `len` data words, MSB first |
| `snc_recv_unit.sv` | Receiving Unit: 32-bit shift register; writes a byte into the IMB every 8 bits |
| `snc_main_ctrl.sv` | Main Control Unit: main FSM and frame tracker, plus the output FSM and the falling-edge output register |

The main control unit is the part to read first. Its **frame tracker** follows every frame
passing the node:

- it sees the start bit, then the type bit;
- it decodes the length and destination when the header is complete;
- it acts at the acknowledgement slot.

While the node has its own message out, the tracker strips the returning frame instead.
The **output FSM** selects what goes on the wire: the repeated input, the type bit, the
body, the acknowledgement slot, quiet zeros, zeros while clearing the line, or a token. Two assertions check that the
body is only driven while the sending unit has data, and that stripping only happens
while the node owns the token.

The only parameter is `N_NODES` on the top (default 32; up to 128 node IDs). Buffer depth
and word width are package constants fixed by the header format.

## Where this RTL departs from, or fills in, the original description

The description gives the following; this RTL follows it:

- the register map and ASIs, header fields and sizes;
- the token ring and its release-after-every-message rule;
- ACK/NACK for every message;
- receiver auto-disable;
- the supervisor check;
- byte-wise reception;
- the rising-edge input and falling-edge output registers;
- the division into the units above.

The description does not give the following; this RTL chooses:

- **Frame format and ACK method.** The start and type bits, MSB-first order, the single
  acknowledgement slot written by the destination, and stripping by the sender are this
  design's own.
- **Length field.** It counts data words after the header (0–7). "One to eight words"
  cannot be held in 3 bits otherwise.
- **Vector field.** The vector sits in bits 14:7, so that it is 8 bits wide between the
  destination and length fields.
- **Status register width.** The status word uses 17 bits, with the interrupt flag at
  bit 16, as in the register drawing. The summary table calls the register 16 bits wide.
- **Reporting ACK/NACK.** Sends report ACK/NACK through two state codes (5 and 6).
- **Command bit 0.** Command bit 0 is taken to be "send".
- **Machine size.** The machine size is used to refuse sends to nodes that do not exist.
- **Token generation.** The generate-token command clears the line for one ring trip
  before sending the token. This makes it the recovery mechanism for a lost or doubled
  token.
- **Reset.** After reset the receiver is disabled and all buffers and the MIR are zero.
- **Buffer arbitration.** The buffers are flip-flop arrays with separate ports, so
  processor and controller accesses never collide. No arbitration FSM is needed.
- **Size.** That choice costs about 600 flip-flops per node, most of them the two
  8-word buffers.
- **Word address.** `cpu_addr` is the 3-bit word index (Sparcle address bits 5:2) of
  the buffer word.
- **Data bus.** The bidirectional processor data bus is split into `cpu_wdata` and
  `cpu_rdata`. Read data is combinational.
- **Clocking.** All nodes share one clock. A folded physical placement of the ring, which
  bounds skew between neighbours, is a layout matter and is not modelled.

The following are not part of this RTL: the broadcast message, which was only suggested
as possible; wider serial links; and larger buffers.

## Verification

Every testbench is self-checking. Each ends with `TB_RESULT checks=N failures=M`, and each
has a watchdog.

| testbench | what it covers |
|---|---|
| `tb_snc_proc_if` | ASI routing, MIR, command pulses, status strobe, user-mode traps |
| `tb_snc_data_module` | OMB/IMB ports, byte-lane writes, reset |
| `tb_snc_send_unit` | bit order and length for every message length, last-bit flag, abort |
| `tb_snc_recv_unit` | byte writes every 8th bit, lanes, header capture, store gating |
| `tb_snc_main_ctrl` | bit-exact ring output for repeat, ACK insertion, refusal, token seize / send / strip / release, size check, token generation with line clearing |
| `tb_snc` | two controllers in a ring; all message lengths in both directions |
| `tb_fugu_sn_ring` | full 32-node ring, default parameters: see below |
| `tb_fugu_ring_sizes` | the same ring at 4 nodes (the prototype size) and 128 nodes (all 7-bit IDs): latency bounds, highest ID, size refusal, all nodes sending at once; uses the helper `ring_size_run` |
| `tb_fugu_workloads` | 32 nodes: the throttling/reactivation burst against its latency budget, and a full page transfer, with a fast receiver and with a slow one that forces retransmission |

`tb_fugu_sn_ring` covers:

- delivery and ACK;
- the 145-cycle latency target;
- an 8-word message that crosses the ring's wrap-around;
- NACK on a disabled receiver, then a successful retransmission;
- NACK protecting an unread input buffer;
- the size check;
- all 32 nodes sending at once, with one seizure each;
- the user-mode trap;
- the reset command;
- recovery from a second token, and from a frame cut by staggered resets;
- a token released after every send that completed.

It counts each mechanism and fails if any one never occurred.

Run one test with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl \
  rtl/fugu_sn_pkg.sv rtl/snc_proc_if.sv rtl/snc_data_module.sv rtl/snc_send_unit.sv \
  rtl/snc_recv_unit.sv rtl/snc_main_ctrl.sv rtl/snc.sv rtl/fugu_sn_ring.sv \
  tb/tb_fugu_sn_ring.sv --top-module tb_fugu_sn_ring -o sim && ./obj_dir/sim
```

For a unit testbench, compile the package, the unit and its testbench. Every test runs in
well under a second.

Lint with `verilator --lint-only -Wall` reports only these warnings:

- unused package constants and unused header bits;
- `SYNCASYNCNET` on the reset, which is used both as the asynchronous flop reset and in the
  assertions' `disable iff`.

### How far it can be trusted

- **Tested:** every unit and the whole ring are exercised in simulation at 2, 4, 32 and
  128 nodes, with every message length. In each unit testbench, a copy of its module with
  one deliberate bug fails.
- **Not tested:**
  - No timing analysis or gate-level simulation has been done.
  - Clock skew between nodes is not modelled. The half-clock margin comes from the
    falling-edge output register and has not been measured.
- **Lost tokens:** no hardware timer detects a lost token. Software must notice that
  sends stop finishing and then run the recovery procedure above. The end-to-end test
  runs that procedure twice:
  - once with a second token on the ring;
  - once with an 8-word message cut by resets issued one node after another.
  Recovery from bit errors on the wires is not tested.
- **Size:** a yosys synthesis of one controller gives about 600 flip-flops. 512 of them
  are the two message buffers. A 32-node ring is about 19 400 flip-flops.
