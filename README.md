# GRIP: a packet-switched multiprocessor for functional programs

This is SystemVerilog RTL for the hardware of GRIP (Graph Reduction in
Parallel), a multiprocessor built to run lazy functional programs. Its
processors share a distributed heap. Parts of that heap live in
*intelligent memory units* (IMUs). An IMU is a microprogrammed engine that
does heap operations such as read, write and pointer chasing. Processors
send it request packets instead of doing bus reads and writes. All
communication, whether on a board or between boards, goes as packets
through a small post office on each board.

The RTL covers the communication hardware and the IMU:

- the post office of each board, called the Bus Interface Processor (BIP);
- the backplane bus between boards and each board's bus interface logic;
- the IMU: its data path, RAM control, ALU and microsequenced control section;
- one board, and the whole machine of 21 boards.

The processors (68020 boards), the memory chips, the host DMA channel and
the diagnostics bus are not designed here. Their connections are ports of
the top module.

## The machine at a glance

```
            Futurebus backplane (futurebus.sv)
   ─────────┬─────────────────┬──────────────── … up to 21 boards
            │                 │
   ┌────────┴───────┐   ┌─────┴──────┐
   │ fb_if          │   │ board 1 …  │
   │  tx sm  rx sm  │   └────────────┘
   │    │     │     │
   │  ┌─┴─────┴──┐  │       grip_board.sv
   │  │   BIP    │──┼── PE0..PE3 request ports (68020s, outside)
   │  │  bip.sv  │  │
   │  └────┬─────┘  │
   │  bip_imu_if    │
   │       │        │
   │     IMU ───────┼── dynamic RAM pins (chips outside)
   └────────────────┘
```

`grip_system` is the top. By default it has 21 boards (`NBOARDS`). Board
`b` sits in bus slot `b` and has board number `b`. Each board has:

- four PE ports;
- an IMU with its RAM pins;
- a load port for the IMU's control store, Jump RAM and register bank;
- an event output that counts what happens on the board (for the testbenches).

The whole design runs on one clock. One period is one IMU *sub-tick*, 21.3 ns
in the original.

## Packets

A word has 34 bits: 33 data bits and a last-word bit.
Bit 33 is 1 on every word of a packet except the last, where it is 0.
A packet has at most 256 words.
Its first word is the *address word*:

| bits  | field      | meaning                                                |
|-------|------------|--------------------------------------------------------|
| 33    | more       | 1 unless this is the last word                         |
| 32:31 | PE         | destination PE (or, for IMU requests, the asking PE)   |
| 30:26 | opcode     | 0: packet for a PE; otherwise an IMU operation         |
| 25:21 | board      | destination board                                      |
| 20:0  | other info | not looked at by the BIP                               |

When a packet arrives over the bus, the receiving board writes the sender's
board number into the board field. So a request that reaches an IMU already
names the board and PE that sent it. The IMU makes its reply header by
clearing the opcode and sends the packet back. Because the rewrite happens
again when the reply arrives, a PE sees the IMU's board number in the reply.

## The Bus Interface Processor (`bip.sv`)

The BIP holds an 8k × 34-bit buffer memory. It is split into frames of
2^`FRAME_LOG2` words (default 256), which gives 32 frames. A word in the
buffer is addressed by a frame number (the *packet address*) and an 8-bit
sub-packet address. Frame numbers move between these stores:

- a free stack of empty frames (`bip_free_stack.sv`, a LIFO that holds
  every frame after reset);
- one FIFO input queue for each PE and one for the IMU (`bip_queue.sv`);
- two send queues, SendA and SendB. One is the send queue and the other is
  the resend queue;
- a temporary store with one entry per master. It holds the frame of a
  packet that is being built over several operations.

Seven masters use the BIP: PE0 to PE3, the IMU interface, the bus
transmitter and the bus receiver. Each master has a request/response port
(`bip_req_t`, `bip_rsp_t`). A request gives:

- *go*;
- where the frame number comes from: free stack, temporary store, the
  master's own input queue, or the send queue;
- where it goes afterwards: keep it, temporary store, route, local route,
  free stack, or resend queue;
- a sub-packet address, and write data if the operation writes.

One operation does three things at once: it takes a frame number, uses it
to read or write one buffer word, and moves the frame number on. So a PE
sends a one-word packet with a single write. That write takes a free frame,
writes the address word into it, and routes the frame.

Routing reads the address word:

- an opcode of 0 with this board's number goes to that PE's queue;
- a nonzero opcode with this board's number goes to the IMU queue;
- any other board number goes to the active send queue.

The routing decision needs the address word. When the last word of a packet
is written, the address word is not on the write bus. Routing then reads it
back from the buffer, which adds one clock.

When the active send queue is empty and the other one is not, the two swap
roles. A packet refused by a busy receiver therefore waits until the other
packets have gone.

Timing: a round-robin arbiter picks one master per operation. The operation
ends with *done* in the fourth clock after *go*, or the fifth when routing
reads the address word back. *fail* reports "no free frame" or "queue empty".

## The BIP/IMU interface (`bip_imu_if.sv`)

This block connects the IMU to the BIP through two latches.

Input side:

- It prefetches the next request word into the input latch.
- When the IMU queue is empty, it watches every buffer write instead (the
  "mouth-open" state). If a write puts the address word of an IMU-bound
  packet into the buffer, it catches the word from the bus into the latch
  as it goes by. That saves a BIP read.
- A caught word is handed over only once its packet is at the head of the
  IMU queue, so packets still reach the IMU in queue order.
- After the last word of a packet, it returns the frame to the free stack.

Output side: the IMU writes reply words into the output latch one at a time.
The interface builds the reply in a frame held in the temporary store. It
routes the frame when the IMU writes the last word.

## The Futurebus and its interface logic (`futurebus.sv`, `fb_if.sv`)

The backplane model is a synchronous bus. Any board may raise *req*. A
central round-robin arbiter picks the next master while the current one is
still sending, so a change of master costs one clock.

Words move on a valid/ready handshake. The board number in the address word
selects the slave for the rest of the packet. A slave answers the address
word with *nak* if it has no empty frame. The bus also naks an address word
for a board that is not present. The electrical Futurebus protocol and its
distributed arbitration are not modelled.

Each board's `fb_if` has two state machines. Each is a BIP master.

- **Transmit:**
  - Fetches words from the send queue one step ahead of the bus, so it fetches the next word while the current one is on the bus.
  - Sends up to `MAX_TENURE` (4) packets back to back in one bus tenure.
  - If a packet is refused, moves its frame to the resend queue and gives up the bus.
  - After a successful send, returns the frame to the free stack.
- **Receive:**
  - Claims an empty frame before a packet arrives, so it can answer an address word at once.
  - Rewrites the board field of the address word.
  - Writes the words into the frame and routes the packet locally at the last word.

## The Intelligent Memory Unit (`imu.sv`)

### Timing

- One *tick* is three sub-ticks (clocks).
- The data section does one register transfer per tick.
- The control section reads one microinstruction per two ticks. This two-tick
  period is the *control cycle*, and its halves are the *tick* and the *tock*.
- `imu_control` produces the timing signals: `tick_start`, `st` (sub-tick
  0..2), `tick_end`, `phase` and `cyc_end`.
- A tick does not start while:
  - the IMU is stopped;
  - the RAM is being refreshed;
  - the microinstruction wants a BIP word that is not there yet, or wants to
    send one while the output latch is full (an *IMU stall*).

### Microinstruction (126 bits)

A microinstruction has a 48-bit cycle part (`cycle_t`) and two 39-bit
data-section parts of the same format (`tick_t`): one for the tick and one
for the tock.

- **Data-section part:**
  - sources for M and G, each with a merge flag;
  - a 12-bit register-bank address and write enable;
  - three RAS bits and three CS bits (one per sub-tick) and one WE bit;
  - J-mux select and a 5-bit constant;
  - BIP read and BIP write.
- **Cycle part:**
  - a 2910 sequencer instruction;
  - condition select and polarity;
  - an 8-bit Jump RAM page and 5 high address bits;
  - the J mode;
  - the ALU instruction, its register addresses and carry-in.

The exact bit layout is this design's own.

### Data path (`imu_datapath.sv`)

The data path is built around a main multiplexer with two registered 40-bit
outputs, M and G. Each tick, M and G are loaded independently from one of
these sources:

- the register bank;
- the ALU;
- the BIP input word;
- the constant;
- the RAM;
- the other register;
- M with its halves swapped;
- or they hold their value.

With *merge* set, the word in the register bank acts as a mask: bits where
the mask is 1 come from the source, and the rest keep their old value.

The register bank has 4096 words of 40 bits. It has a single port: in a
tick, the addressed register is either read (as a source or as a merge
mask) or, with write enable set, written from G at the end of the tick, but
not both. An assertion flags a microinstruction that tries both.

The constant input is the J mux output, 5 bits, repeated eight times across
40 bits. With a mask, this puts a 5-bit field anywhere in M or G.

### ALU (`imu_alu.sv`)

The ALU is 32 bits wide and follows the 2901 bit-slice: 64 dual-ported
registers, a Q register, 9-bit instructions and carry, zero, sign and
overflow flags. Its input is M, and its output is a source for M and G. It
steps once per control cycle, at half the data-section rate.

### RAM control (`imu_dram_ctrl.sv`)

Each tick, the three RAS bits and three CS bits are loaded broadside into
shift registers and shifted every sub-tick. The pins follow the shift
register outputs. WE can only be active in the middle sub-tick. The address
pins carry M[10:0].

A RAM access takes three ticks:

1. RAS goes active with the row address from M, while M swaps its halves.
2. CS goes active with the column address (the old M[30:20]).
3. The data word is loaded into M, or written from M.

So RAS active to data in M is 9 clocks. That allows 4M words per IMU with
an 11-bit multiplexed address.

Each 40-bit word has one even parity bit. Reading a word with a bad parity
bit sets the sticky `par_err` flag.

Refresh:

- Every 200 ticks of time (600 clocks), whether the IMU is running or
  waiting, a RAS-only refresh of the next row becomes due.
- The refresh waits for a tick boundary at which RAS and CS are both inactive.
- It then holds the whole IMU for 6 sub-ticks, which is 1% of the time.
- The microprogram does not see refresh.

### Control section (`imu_control.sv`, `imu_sequencer.sv`)

- **Control store:** 8k × 126 bits.
- **Sequencer:** a 2910 widened to a 16-bit address path, with all 16
  instructions. It has a 33-deep stack. A push onto a full stack overwrites
  the top entry.
- **Conditions and the J latch:**
  - The condition code (CC) mux and the J mux are sampled at the end of each
    control cycle into the CC and J latches.
  - The next cycle uses those latches for its branch, so there is one level of
    pipelining.
  - The J mux inputs are the microinstruction constant, the RAM word's tag, G's
    tag and G's opcode/flag field.
- **Jump RAM:** 8k × 8.
  - Its address is the page from the microinstruction followed by 5 bits
    taken from the J latch according to the J mode: as latched, all zeros,
    or with the top bit forced to 0 or to 1.
  - Its output is the low 8 bits of the branch address, and the
    microinstruction supplies the upper bits.
  - This gives 32-way jumps, 16-way jumps and plain jumps. For a plain jump,
    location 0 of each page holds the page number, so the Jump RAM passes the
    address through unchanged.

## Parameters

| module        | parameter    | default | origin |
|---------------|--------------|---------|--------|
| grip_system   | NBOARDS      | 21      | maximum number of boards on one bus |
| bip           | BUF_WORDS    | 8192    | buffer size, 34-bit words |
| bip           | FRAME_LOG2   | 8       | 256-word frames (strap-selectable in the original) |
| bip_queue, bip_free_stack | DEPTH | 32 | own choice: one entry per frame |
| fb_if         | MAX_TENURE   | 4       | own choice |
| imu_datapath  | NREGS        | 4096    | register bank size |
| imu_alu       | W, NREGS     | 32, 64  | 2901-based ALU |
| imu_sequencer | AW, STACK_DEPTH | 16, 33 | extended 2910 |
| imu_control   | CS_WORDS, UI_W | 8192, 126 | control store |
| imu_dram_ctrl | REF_INTERVAL, REF_SUBTICKS | 200, 6 | own choice, meeting the "under 1.5%" refresh bound |

## Departures from the original machine and other own choices

- **Synchronous BIP.** The original BIP is asynchronous, built from PALs,
  with an asynchronous arbiter and a Go/Done handshake. Here it is
  synchronous: a round-robin arbiter and a fixed 4- or 5-clock operation. Go
  and Done are kept as the handshake.
- **Point-to-point masters.** The board's internal bus is modelled as one
  request/response port per BIP master, not as a shared bus. The mouth-open
  catch still sees every buffer write, through a snoop port.
- **Temporary store.** It has one entry per master.
- **Futurebus.** The bus is a synchronous behavioural model of arbitration
  and block transfer, not the Futurebus electrical protocol. Tenure is
  limited to 4 packets.
- **Receiver frames.** The receiver claims a frame ahead of time. It refuses
  a packet when it has none.
- **Register bank address.** The original uses short register addresses in
  the instruction to name 40-bit constants. Here the register address in the
  microinstruction is a full 12 bits.
- **Microcode-defined details.** The condition inputs, J-mux inputs, J
  modes, microinstruction layout, parity scheme, refresh interval and IMU
  stall rule are this design's own.
- **Load port.** A parallel load port stands in for the 8-bit diagnostics bus
  that loads each board.

## Not built

- **Processing elements.** These are 68020 CPUs with floating-point units
  and private memory. Their BIP ports are top-level ports.
- **Dynamic RAM chips.** Their pins are top-level ports. `tb/dram_model.sv`
  is a behavioural model used by the testbenches.
- **Host DMA channel and diagnostics bus.** The original gives no structure
  or protocol for them.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`:

| testbench | what it checks |
|-----------|----------------|
| tb_bip_queue, tb_bip_free_stack | random push/pop against a model, full/empty, reset contents |
| tb_bip | one-operation send (4-clock latency), staged packets and route read-back (5 clocks), send/resend swap, ordering, running out of frames, arbitration |
| tb_bip_imu_if | prefetch, mouth-open catch from the receiver and from a local PE, queue-order handover, reply building |
| tb_futurebus | round-robin arbitration, one-clock handover, slave selection, nak for absent boards |
| tb_fb_if | transmit pipelining, bursts, nak and resend, receive with board-field rewrite |
| tb_imu_alu | 2901 sources, functions, destinations and flags against a model |
| tb_imu_datapath | all mux sources, merge under mask, swap, register bank, constant replication |
| tb_imu_dram_ctrl | RAS/CS/WE waveforms per sub-tick, address and data pins, refresh (deferred while RAS is held, successive rows, hold length), parity |
| tb_imu_sequencer | all 2910 instructions, stack depth, counter, against a model |
| tb_imu_control | identity jumps, 32-way and 16-way jumps, CC latch and polarity, call/return, tick and cycle timing, hold |
| tb_imu | a request-serving microprogram: WRITE, READ, pointer chase, RAM timing (RAS to data 9 clocks, READ 9 ticks), parity error, BIP stalls, refresh |
| tb_grip_board | one board on a two-slot bus: local PE packets, IMU requests, nak and resend to another board, incoming packet, event counts |
| tb_grip_system | the whole machine at its default size (21 boards, 84 PE ports) |

The IMU, board and system testbenches load `imu_ucode_pkg`'s microprogram.
It serves three operations: READ (opcode 1), WRITE (opcode 2) and CHASE
(opcode 3, follow pointer words until one without the pointer bit). It
dispatches with a 32-way jump on the opcode. In the original machine, a
request names its cell in the address word's other-info field. This
microprogram instead takes a full RAM word address from the second word, so
that it can test all 22 address bits. It is test code, not part of the
hardware.

`tb_grip_system` runs at the default parameters, with no parameter
overrides. It sends:

- local and remote PE-to-PE packets;
- local and remote IMU requests;
- a pointer chase;
- 80 packets from 20 boards at once to one PE that reads late, so the
  receiving board runs out of frames and refuses packets;
- 16 requests from 8 boards to one IMU;
- a read of a RAM word with bad parity.

It counts every mechanism, and a mechanism that never happens is a failure:

- send-queue swaps;
- local and remote routing;
- mouth-open catches;
- naks;
- packets sent and received;
- multi-packet bursts;
- refreshes;
- IMU stalls on the BIP;
- bus handovers;
- parity errors.

It takes about 15,700 clocks and simulates in under a second.

For each module, a copy with one deliberate bug was run against its
testbench, and every testbench reported failures.
