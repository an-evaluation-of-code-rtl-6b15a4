# SDL processes in hardware: server model versus activity threads

An SDL specification is a network of processes. Each process is an extended
finite state machine (EFSM) with its own unbounded input queue, and the
processes talk only through asynchronous signals. There are two ways to turn
such a network into hardware:

- **Server model.** Every process becomes its own hardware entity, with input
  interfaces, a FIFO message queue, the EFSM and output interfaces, all
  running in parallel. It maps SDL one to one and pipelines well. Each hop
  between processes, though, costs a full receive, queue and send, so the
  response to an external event is the sum of every process on its path.
- **Activity threads.** The network is cut along the chains of transitions
  that one external event sets off. Each chain (an *activity thread*) runs as
  one sequential piece of hardware, with no messages inside it. Only the
  signals at the border of the model need interfaces and queues.

This RTL builds both models for the same small example. It builds the activity
threads in three architectures, so their response times can be measured side
by side. It also contains a stand-alone ping-pong process that characterises
the server-model run-time components, and a CAN bus physical layer written as
one serialized activity thread. Everything is in synthesizable SystemVerilog.
The top module `sdl_hw_top` places all of it side by side, each part with its
own ports.

## The example network

Five processes, PrA to PrE, serve two external events. Two signals come in
from the environment:

```
m11 -> PrA --m12--> PrC --m13--> PrD --m14--> environment
m21 -> PrB --m22--> PrC --m23--> PrE --m24--> environment
```

A transition triggered by signal `m_ij` runs a task `c_ij` on the 8-bit
message parameter and sends `m_i(j+1)`. PrC lies on both chains. PrE has two
states, EX and EY, and runs a different task in each (`c23'` and `c23''`).

The structure above comes from the source material. The task bodies are not
given there, so `sdl_pkg.sv` defines simple ones:

| task | effect on the parameter x |
|---|---|
| c11 | x + 0x11 |
| c12, c22 | x + var_c, where var_c is PrC's transition counter (incremented by both) |
| c13 | x + 0x13 |
| c21 | x + 0x21 |
| c23' (PrE in EX) | x + 0x23, then PrE moves to EY |
| c23'' (PrE in EY) | x XOR 0x23, then PrE moves to EX |

These tasks were chosen so that the process data is visible in the result.
PrC's counter is state shared by both chains, which is exactly what the
parallel architecture has to protect with a lock. Because of PrE's state
switch, the result also reveals the order in which m21 events were handled.

A message is a `sdl_pkg::msg_t`: a 4-bit signal identifier plus an 8-bit
parameter.

## Run-time components (server model)

Every server-model entity uses the same parts:

- `hs_rx`: the input interface, one per incoming channel.
  - Channels use a four-phase handshake: the sender drives data and raises
    `req`, the receiver raises `ack`, then `req` falls and then `ack` falls.
  - `req` and data are registered on entry. The message appears on the
    internal valid/ready stream 2 cycles after `req` is first seen.
- `stream_arb`: a round-robin multiplexer. It merges several input interfaces
  into one queue.
- `msg_queue`: a plain FIFO with `DEPTH` entries. A message written in one
  cycle can be read in the next.
  - `DEPTH = 0` is a pass-through with no storage.
  - SDL `save` and priority input are not supported. Both would need removal
    from the middle of the queue.
- `hs_tx`: the output interface. It takes a message in one cycle and raises
  `req` in the next.
- `sdl_rts_shell`: wires the parts above around an EFSM port.
- `sdl_timer`: an SDL timer.
  - It counts `duration` ticks, then offers its signal on a valid/ready stream
    so that it can enter the owner's queue like any other message.
  - Setting it again, or cancelling it, withdraws an expiry that has not yet
    been taken.

Every interface runs concurrently with the EFSM, so a send never blocks the
sender.

### Timing of one server-model hop

| stage | cycles |
|---|---|
| input interface (2) and queue (1) | 3 |
| EFSM: dequeue, then task and output | 2 |
| output interface | 2 |
| **total**, `req` seen to answer `req` raised | **7** |

`pingpong_process` is one such entity. It echoes every message and counts the
exchanges. Its message width `MSG_W` and queue length `QLEN` are parameters,
with defaults of 8 bits and 2 entries. With `QLEN = 0` the hop takes 6 cycles.

## Activity-thread architectures

All three architectures compute the same results as the server network
(`server_net`, five `server_process` instances). They differ in how events
wait and in what runs in parallel.

### Serialized, single queue (`at_serial_single`)

- Events m11 and m21 have their own input interfaces. A round-robin
  multiplexer merges them into one queue.
- One engine (`at_engine`) holds both threads. It takes one event and runs its
  three tasks one per cycle, on a single shared task unit. It then hands the
  result to the m14 or m24 output interface.
- Only one thread runs at a time, so PrC's counter and PrE's state need no
  protection.
- The cost is waiting: an event waits for everything queued before it.

### Serialized, priority queue (`at_serial_prio`)

- The same engine, but each priority class has its own queue. `prio_select`
  hands the engine the head of the highest non-empty queue.
- A high-class event therefore waits for at most the event already in
  execution.
- `M21_HIGH` chooses which event is the high class. The default is m11.

### Parallel threads with a lock (`at_parallel`)

- Each thread (`at_thread`) has its own queue, engine and interfaces. Both can
  run at once.
- The difficulty is PrC. Its transitions sit in both threads, so its variable
  `var_c` is shared state that the two threads must access in mutual
  exclusion.
  - `var_c` lives in `at_parallel`.
  - A thread raises `lock_req` before PrC's task and waits for `lock_gnt`
    from `at_lock`.
  - It then reads, computes and writes `var_c` back while it holds the grant,
    and releases the lock in the next cycle.
- The lock has these properties:
  - The grant is registered, so it rises one cycle after the request.
  - It stays with its holder for as long as the holder's request is high.
  - It passes round robin, so a thread blocks for at most one critical section
    of the other thread.
- Assertions check three things: the grant is one-hot or zero, no grant goes
  to a thread that is not requesting, and every `var_c` write happens under
  the lock.
- PrE's state is used only by thread 2, so it stays local to that thread.

When both threads reach PrC together, one of them blocks. That blocking adds
to its response time. This is the price of parallel execution, and this
architecture does not pipeline the way the server model does.

### Response times, measured (isolated event, `req` seen to `req` out)

| implementation | cycles |
|---|---|
| server model (three entities of 7 cycles each: PrA or PrB, PrC, PrD or PrE) | 21 |
| serialized, single queue | 9 |
| serialized, priority queue | 9 |
| parallel threads, lock free | 11 |

In the activity-thread cases, 9 cycles breaks down as follows:

- 3 cycles for input and queue;
- 1 cycle to take the event;
- 3 cycles of tasks;
- 2 cycles for the output interface.

The parallel thread adds the lock request and grant. A priority queue would
normally cost a little more access time than a single queue. Here the
selection between the class queues is combinational, so both serialized
versions answer an isolated event in the same 9 cycles. Under load they
differ: a high-class event waits for at most one event in execution, while in
the single queue it waits for the whole queue. The per-hop numbers of
the server model come from the source. How the cycles split inside each stage,
and the task-per-cycle schedule, are this design's own choices.

## CAN physical layer (`can_phy`)

This block sends and receives single bits on a CAN bus. It handles bit timing,
bit stuffing and synchronization. It is specified as seven SDL processes, and
here they are merged into one sequential thread that starts on every
controller tick:

- **Clock.** An `sdl_timer`, re-armed on each expiry, gives a `ctrl_clock`
  every `controller_period` cycles.
- **Timing.** Counts `TICKS_PER_BIT` (8) ticks per bit.
  - Tick 0 is `can_clock`, the start of a bit.
  - Tick `SAMPLE_TICK` (6) is `sample_now`, the sample point.
- **Transmitter.** On `can_clock` it drives `tx_level`. It sends one of these,
  in order of precedence:
  - a stuff bit, if one is due;
  - the next bit `tx` offered by the data link layer (and pulses `tx_taken`);
  - otherwise recessive (1).
- **Receiver.** On `sample_now` it samples `bus_level` and passes the bit up
  as `rx` with `rx_valid`. Stuff bits are not passed up.
- **Bit stuffing.** Active between `start_stuff` and `reset_stuff`.
  - After five equal bits it raises `stuff_now`, and the next bit on the bus
    is the complement.
  - If a sixth equal bit arrives instead, it pulses `error`.
- **Synchronization.**
  - Reports every recessive-to-dominant edge on `rx_edge`.
  - Once armed by `rx_sync` (or by a wake-up), it hard-synchronizes: the tick
    at which the edge was seen becomes tick 0 of a new bit.
  - Every other edge resynchronizes by at most `SJW` ticks (default 1):
    - The bus is looked at once per tick. An edge driven at tick 0 is
      therefore seen at tick 1, so ticks 0 and 1 count as in phase.
    - An edge seen at ticks 2 to `SAMPLE_TICK` is late. The bit is
      lengthened, which delays the sample point.
    - An edge seen after the sample point belongs to the next bit, which is
      early. The current bit is shortened.
  - `seg` gives the bit segment of the current tick.
- **Controller.**
  - `reset` restarts timing and stuffing.
  - `sleep` stops the Clock until a dominant bus edge arrives. That edge pulses
    `awoken` and restarts the Clock.

The thread has a fixed schedule:

1. cycle 1: take the tick;
2. cycle 2: the `can_clock` or `sample_now` branch;
3. cycle 3: stuffing;
4. cycle 4: receiver output.

So `rx_valid` rises exactly 4 cycles after its `ctrl_clock`, and
`controller_period` must be at least 4.

The bit rate follows from that minimum:

- At the minimum period and an 80 ns clock, one bit takes 8 × 4 × 80 ns =
  2.56 µs, which is about 390 kbit/s.
- 1 Mbit/s would need a clock period of 31.25 ns or less.

For comparison, a server-model version of the same processes needs about 16
cycles for this path. Most of that goes to the messages between Clock, Timing
and Receiver. That version is not included here.

The sample point, the jump width, the stuffing rules and the stuff error
follow the CAN standard. The data link layer marks the frame with
`start_stuff` and `reset_stuff`, because only it knows where stuffing starts
and ends. Only the signals above are built into the Controller. The `tx_local` feedback from the Transmitter to the Controller is
not used.

## Design choices beyond the source

The following are this design's own decisions:

- **Handshakes and streams.** The channel protocol (four-phase `req`/`ack`)
  and the valid/ready streams inside each entity.
- **Reset.** An active-low synchronous reset (`rst_n`) on all state.
- **Example data.** The 8-bit message parameter and the example's task bodies.
- **Arbitration.**
  - The round-robin input multiplexer.
  - Strict priority in `prio_select`.
  - The round-robin lock.
- **Cycle budgets.** The schedule inside the engines and threads.
- **Queues.** Plain FIFOs, with no `save` or priority input. `DEPTH = 0` is a
  pass-through.
- **CAN.** The CAN details listed above.

The three architectures are not combined with each other or with the server
model, although that would be possible because they share the same interfaces.

## Files

**Package**

- `rtl/sdl_pkg.sv`: signal identifiers, message type and task functions.

**Run-time components**

- `hs_rx`, `hs_tx`, `msg_queue`, `stream_arb`, `sdl_rts_shell`, `sdl_timer`.

**Server model**

- `pingpong_process`
- `example_efsm`, `server_process`, `server_net`

**Activity threads**

- `at_engine`, `at_serial_single`
- `prio_select`, `at_serial_prio`
- `at_lock`, `at_thread`, `at_parallel`

**CAN**

- `can_phy`

**Top**

- `sdl_hw_top`

**Testbenches** (`tb/`)

- Each RTL module has a self-checking testbench, `tb_<module>.sv`. It checks
  results against a reference model written independently in
  `tb/tb_model_pkg.sv` or in the testbench itself, and checks cycle counts
  where they are fixed.
- `tb_hs_src` and `tb_hs_sink` are four-phase channel drivers shared by the
  testbenches. They also check the protocol.
- `tb_pingpong_sweep` runs the ping-pong process at message widths of 1, 4,
  16, 24 and 31 bits and at queue lengths 0, 1, 4, 16 and 24.
- `tb_sdl_hw_top` is the end-to-end test at default parameters. It runs:
  - the same random event streams through all four example implementations;
  - ping-pong traffic against a stalling receiver;
  - a 24-bit CAN frame in loopback, then a second node on the bus forcing a
    resynchronization, a stuff error, a hard synchronization and a wake-up.

  `tb_can_phy` covers the remaining CAN behaviour at the shortest controller
  period of 4 cycles: stuff errors, hard synchronization, resynchronization
  at every tick of a bit, and sleep and wake-up.

  It checks the isolated response times (7, 21, 9, 9 and 11 cycles). It also
  counts how often each mechanism occurred and fails if any never did:
  - queues filling;
  - input merging;
  - priority overtaking;
  - lock blocking;
  - parallel execution;
  - a full ping-pong queue;
  - the CAN mechanisms named above.

Every testbench ends with a line `TB_RESULT checks=<n> failures=<n>`.

## Simulating

Use Verilator 5 with timing support. For example, for the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sdl_pkg.sv tb/tb_model_pkg.sv tb/tb_sdl_hw_top.sv --top-module tb_sdl_hw_top
./obj_dir/Vtb_sdl_hw_top
```

Replace `tb_sdl_hw_top` with any other testbench name. Add
`+verilator+rand+reset+2` to start uninitialised state at random values.
Every testbench has a watchdog, and each finishes in well under a second.

To change a size, set a parameter on the top or the block, for example
`DEPTH` (queue length of the example implementations), `PP_MSG_W` and
`PP_QLEN` (ping-pong), `M21_HIGH` (priority class), or `CAN_TICKS_PER_BIT`,
`CAN_SAMPLE_TICK` and `CAN_SJW`.
