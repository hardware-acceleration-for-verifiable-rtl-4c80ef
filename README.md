# Network Code Processor

Network Code is a small language that describes time-triggered communication
schedules for real-time Ethernet. A program says which variable goes out on
which channel in which time slot and when to wait for the next slot. Because
such a program can be checked offline for timing and deadlock, it is worth
running with no software jitter. This RTL runs it in hardware: a co-processor
sitting between a host CPU and an Ethernet MAC. The host loads a program and
the variables. The processor then sends, receives, synchronises and switches
modes on its own, one time unit after another, and interrupts the host only
when the program asks it to.

The processor is built as a small superscalar ASIP (application-specific
processor). Each instruction has its own execution unit. A controller issues
at most one instruction per cycle and lets it run alongside the units that
are still busy, whenever a fixed dependence table allows it. That table is
what makes the design fast, and most of this README is about it.

## Instructions

| instruction | unit | what it does | cycles |
|---|---|---|---|
| `create(var, len)` | `ncp_create_unit` | copies `len` words of a variable into the send buffer | 7 + len |
| `send(ch)` | `ncp_send_unit` | sends the message in the send buffer as one frame on channel `ch` | 5 + 30 + 4·len |
| `receive(ch, var, len)` | `ncp_receive_unit` | copies the last frame of channel `ch` into a variable | 31 + 4·len |
| `sync(ch, t)` | `ncp_sync_unit` | waits for a frame on `ch` or for `t` time units | until frame/timeout |
| `future(d, label)` | `ncp_timer` | arms the alarm for `d` time units from now, resuming at `label` | 3 |
| `halt()` | controller | stops until the alarm fires | 2, then sleeps |
| `mode(m)` | `ncp_mode_unit` | switches init/soft/hard/sync once nothing is being transmitted | ≥ 1 |
| `if(guard, target, op1, op2)` | `ncp_branch_unit` | conditional branch on a guard | 1 or 3 |
| `nop()` | controller | does nothing | 1 |
| `destroy()` | send buffer | drops the message in the send buffer | 1 |
| `signal(code)` | controller | raises the host interrupt with an 8-bit code | 1 |
| `count(op, k, v)` | `ncp_counters` | reset/set/increment/decrement counter `k` | 1 |

The cycle counts of create, send, receive, future and halt come from the
published design. At 128-word variables they give 135, 547 and 543 cycles.
The other counts and everything in the encoding are this design's own.

Guards: `AlwaysTrue`, `AlwaysFalse`, `TestVar` (var ≠ 0), `GreaterVarVar`,
`CompareVarVar` (equal) and `LessVarVar`, which are value comparators on two
words of variable memory. There are also two state tests: `StatusTest`
(the last sync() saw its frame) and `SendBufferEmpty`. Then `MsgReceived`
(a channel holds an unread frame), and the counter comparators `CounterEq`
and `CounterLess` against a constant. Value comparisons are unsigned, 32-bit.

### Instruction word

Instructions are 64 bits (`ncp_pkg::instr_t`):

```
 63   60 59        48 47        32 31        16 15         0
+-------+------------+------------+------------+------------+
|  op   |    sub     |     c      |     b      |     a      |
+-------+------------+------------+------------+------------+
```

| op | name | a | b | c | sub |
|---|---|---|---|---|---|
| 0 | nop | | | | |
| 1 | create | variable base (word) | length (words) | | |
| 2 | send | channel | | | |
| 3 | receive | channel | variable base | variable length | |
| 4 | sync | channel | timeout (time units) | | |
| 5 | halt | | | | |
| 6 | future | delay (time units) | label | | |
| 7 | mode | mode (0 init, 1 soft, 2 hard, 3 sync) | | | |
| 8 | if | target | operand 1 | operand 2 | guard |
| 9 | destroy | | | | |
| 10 | signal | code | | | |
| 11 | count | counter | value | | 0 reset, 1 set, 2 inc, 3 dec |

The guard numbers are in `ncp_pkg::guard_e`.

## Concurrency control

Whether instruction *y* may start while instruction *x* is still running is
looked up in `ncp_pkg::dep_action(y, x)`:

- **c**: continue. *y* starts at once and overlaps *x*.
- **w**: wait until *x* has finished.
- **b**: wait until the internal memory bus is free. create(), receive() and
  the value comparators of if() use the bus.

The controller looks *y* up against every unit that is busy, not only the
previous instruction. *y* issues when no busy unit says `w`, and no unit says
`b` while the bus is taken. Otherwise it stays in decode and is checked again
the next cycle. The controller reports every overlapped issue and every
stalled cycle, split into `w` and `b` stalls, as event pulses.

The table (row = instruction to issue, column = instruction still running):

| y \ x | nop | create | send | receive | sync | halt | future | mode | if |
|---|---|---|---|---|---|---|---|---|---|
| nop | w | c | c | c | c | w | c | w | c |
| create | w | w | c | b | c | w | c | w | w |
| send | w | c | w | c | w | w | c | w | w |
| receive | w | b | c | w | w | w | c | w | w |
| sync | w | c | w | c | w | w | c | w | w |
| halt | w | c | c | c | w | w | c | w | w |
| future | w | c | c | c | c | w | w | w | w |
| mode | w | c | w | w | w | w | c | w | w |
| if | w | b | c | b | w | w | c | w | w |

Three points are easy to miss:

- **create and send overlap.** The send buffer is a FIFO between them, and
  send() builds its 18-byte header for about 30 cycles before it reads the
  FIFO. By then create() is far ahead: it writes one word per cycle, while
  the send side reads one word per four cycles. So `create(); send();` costs
  little more than the send alone. In the other order, create while send is
  still running, the new message queues behind the one being sent. The
  buffer counts up to three messages, so `SendBufferEmpty` stays correct.
- **halt runs alongside the transfers.** halt() may issue while create, send
  and receive are still working. The processor is "halted" after about 140
  cycles, while the transfers end some 680 cycles into the slot. The
  sequential schedule would need about 1230 cycles, more than one 1000-cycle
  time unit.
- **Additions the table does not list.** destroy() uses the create row and
  column, and also waits for a running send(), since both touch the send
  buffer. signal() and count() use the nop row and column. After an if(),
  fetch waits for the outcome: a branch costs one refetch cycle and nothing
  is fetched speculatively.

## Time base

`ncp_timer` divides the clock into time units of `QUANTUM` = 1000 cycles,
which is 10 µs at 100 MHz. `now` counts time units. There is one alarm.
future(d, L) sets it to fire at the start of unit now + d, and a second
future() replaces the first. When the alarm fires, a halted processor resumes
at L. A processor that is not halted takes the alarm at its next halt(). A
successful sync() restarts the current time unit at the frame's arrival,
which aligns the slot boundaries of the receiving node to the sender.

## Modes and traffic classes

There are four modes: init (after reset), soft, hard and sync. Only guaranteed
traffic, the frames made by send(), is sent in hard and sync mode. In soft
mode, the host's best-effort frames may also go out. `ncp_tx_arbiter` works
frame by frame: it never cuts a frame, and a waiting send() frame goes before
a waiting best-effort frame. mode() does not complete while any frame is on
the wire. So a mode switch cannot cut a best-effort frame, and the next
guaranteed slot starts on an idle network.

On the receive side, `ncp_rx_parser` sorts frames by EtherType. Frames with
`0x88B5` are Network Code frames and go, by their channel byte, into that
channel's byte buffer (`ncp_rx_buffer`). The channel's "unread" flag is set
when the frame is complete. Any other frame goes to the host's best-effort
receive queue. Each channel holds one frame. A new frame arriving before the
old one was received overwrites it and pulses `ev_rx_overrun`. A best-effort
frame that does not fit its queue is dropped whole (`ev_be_drop`). receive()
takes the last complete frame of its channel and clears the flag.

### Frame format

The MAC adds the preamble, padding and FCS:

| bytes | field |
|---|---|
| 0–5 | destination, broadcast (ff:ff:ff:ff:ff:ff) |
| 6–11 | source, `NODE_ADDR` |
| 12–13 | EtherType 0x88B5 |
| 14 | channel |
| 15 | reserved, 0 |
| 16–17 | payload length in 32-bit words, MSB first |
| 18– | payload, each word MSB first |

## Structure

```
 host ──prog──> ncp_prog_mem ──> ncp_controller ──issue──> units
 host ──port B── ncp_var_mem ──port A── ncp_mem_bus ── create / receive / if
 create ─> ncp_send_fifo ─> send ─┐
 host ─> ncp_byte_fifo (BE tx) ───┴─> ncp_tx_arbiter ─> MAC tx
 MAC rx ─> ncp_rx_parser ─┬─> ncp_rx_buffer (per channel) ─> receive
                          └─> ncp_byte_fifo (BE rx) ─> host
 ncp_timer (time base, future alarm), ncp_sync_unit, ncp_mode_unit,
 ncp_branch_unit, ncp_counters
```

`ncp_top` is one node. Its ports are the following:

- **host**: `start`; a program write port; port B of the variable memory
  (32 bits, one cycle read latency); `irq`/`irq_code`/`irq_ack`; status
  (`running`, `halted`, `mode`, `now`); and the best-effort queues. Writes to
  `be_tx_*` are committed as a frame on `be_tx_last`. `be_rx_*` is a
  first-word-fall-through read port.
- **MAC**: `mac_tx_*` is a valid/ready byte stream with an end-of-frame flag.
  `mac_rx_*` is a byte stream with no back-pressure.
- **events**: `ev_*` one-cycle pulses, for performance counters or tests.

The Ethernet MAC and the host CPU are not part of the RTL.

The internal bus is 32 bits wide and the MAC side is 8 bits wide. That
mismatch is why send() and receive() take four cycles per word.

No unit checks programs at run time: there are no traps for bad addresses,
channels or lengths. Programs are meant to be verified before they are
loaded. Out-of-range fields are truncated to their width.

## Parameters of ncp_top

| parameter | default | meaning |
|---|---|---|
| `PROG_DEPTH` | 1024 | instructions |
| `VAR_WORDS` | 4096 | 32-bit variable words |
| `SEND_WORDS` | 512 | send buffer words |
| `CHANNELS` | 4 | receive channels |
| `RX_BYTES` | 2048 | bytes per channel buffer |
| `BE_BYTES` | 2048 | bytes per best-effort queue |
| `QUANTUM` | 1000 | cycles per time unit |
| `NCNT` | 4 | counters |
| `NODE_ADDR` | 02:00:00:00:00:01 | source MAC address |
| `CREATE_SETUP`, `SEND_SETUP`, `SEND_HDR`, `RECV_SETUP` | 7, 5, 30, 31 | fixed cycle costs of the transfer units |

The published design gives `QUANTUM` (10 µs at 100 MHz) and the four cycle
costs. It does not give any memory size. The sizes here let a 1500-byte
payload fit every buffer. Together they come to about 308 Kbit, roughly 17
FPGA block RAMs of 18 Kbit.

## Where this departs from the published design

- **create() setup cost.** The published timing formula counts 8 setup cycles
  for create(), but its worked example for 128 words gives 135 cycles. The
  RTL follows the example (7 cycles); the eighth is counted as the issue
  cycle.
- **Undefined details.** The frame header, the instruction encoding, the
  guard operands, the counter operations, buffer sizes, the overrun policy
  and the sync() timeout unit are all this design's choices. How sync()
  corrects the clock (restarting the current time unit) is also a choice.
- **Modes.** The mode set (init, soft, hard, sync) merges two descriptions:
  one lists three modes, the other uses init for setting up.
- **Bus arbitration.** There is no arbiter on the memory bus. Exclusive use
  follows from the `b` entries of the table. `ncp_mem_bus` asserts that at
  most one unit drives it.
- **Host interface.** The host interface is deliberately plain: memory ports
  and an interrupt, not an operating-system network driver interface.

## Simulation

All files are SystemVerilog-2017. Every testbench checks itself and ends by
printing `TB_RESULT checks=<n> failures=<m>`. Each has a watchdog. To run one
with Verilator (5.x):

```
verilator --binary --timing -Wno-fatal -y rtl --top-module tb_ncp_top \
    rtl/ncp_pkg.sv tb/tb_ncp_top.sv
./obj_dir/Vtb_ncp_top
```

The package comes first; `-y rtl` finds the modules by name. The same line
runs any other testbench, for example `tb_ncp_send_unit` or
`tb_ncp_throughput`. Every block has its own testbench, which checks its
function and, where a cycle cost is defined, the exact cycle count.

`tb_ncp_top` joins two nodes at the default parameters back to back. Each
node's transmit stream is the other's receive stream. It runs eight time
units:

- Node A runs create/send/receive/future/halt every slot with 128-word
  variables. It switches to soft mode in one round, so a 400-byte best-effort
  frame goes out. The next mode(hard) then has to wait for that frame.
- Node B tests destroy() and `SendBufferEmpty`. It lets one sync() time out
  and catches A's first frame with another. It then answers every slot,
  receives only every other round, which produces overruns, and signals its
  host.

The testbench checks:

- that data arrives intact in both directions;
- that A is halted with all units idle at each slot boundary;
- the interrupt codes;
- that every mechanism happened: overlap, both kinds of stall, halt/resume,
  mode wait, best-effort traffic both ways, overrun, sync success and
  timeout, destroy, and branches both ways.

The controller's testbench runs the standard slot program with 128-word
variables. The processor is halted after 139 cycles and all units are idle
after 680 cycles. The published design gives 145 and 682; the difference is
in how the issue cycles of the first instructions are counted. Both are well
inside the 1000-cycle time unit.

### Throughput

`tb_ncp_throughput` runs the periodic transfer of one variable between two
nodes, through a behavioural 100 Mbit/s MAC model. The model takes one byte
per 80 ns and adds an 8-byte preamble, padding to 60 bytes, a 4-byte FCS and
a 10-byte gap. For each size the testbench measures how long a slot needs.
It then checks that the smallest whole number of 10 µs time units keeps the
slot structure, and that one unit less does not.

| variable | cycles per frame | period | throughput |
|---|---|---|---|
| 4 B | 671 | 10 µs | 390 kB/s |
| 80 B | 975 | 10 µs | 7812 kB/s |
| 200 B | 1935 | 20 µs | 9765 kB/s |
| 500 B | 4335 | 50 µs | 9765 kB/s |
| 1000 B | 8335 | 90 µs | 10850 kB/s |

These are the slot counts and throughputs of the published analytic model,
TP = B / (⌈(t_p + t_s)/10 µs⌉ · 10 µs), with
t_p = (13 + B/4) · 10 ns and t_s = (36 + max(B, 28)) · 80 ns. The throughput
saw-tooths with size. The transfer time grows linearly with the variable, so
a variable just too big for one slot count costs a whole extra time unit.
