# A register-mapped message interface for a fine-grain multicomputer node

Fine-grain parallel programs send many short messages, often about ten
words each. For messages that short, the cost is in the processor cycles
spent moving words between registers, buffers and the network, and in
checking who may send what to whom. The time on the wire matters less.
This design removes most of those cycles:

- **Sending.** A thread builds a message directly in ordinary processor
  registers, the *message composition* (MC) registers. It then launches the
  message with one `SEND` instruction. Hardware streams the registers into
  the network while the thread keeps running. The message is never copied
  into a buffer first.
- **Receiving.** Incoming words are queued by hardware. A handler thread
  sees the queue through two special registers. `R_head` gives the address
  of the handler for the next message. `R_body` gives the next word of the
  current message, and each read removes that word.
- **Naming and protection.** A message is addressed to a global *virtual*
  address, and the handler is named by a protected pointer. A small global
  TLB (GTLB) turns the address into a node number. A user thread therefore
  never sees physical node numbers, and may start only handlers it holds
  a pointer for.
- **Flow control.** A counter, the OMBC (outstanding message buffer
  counter), limits how many of a node's messages may be unacknowledged at
  once. When it reaches zero, user sends stop.

The RTL implements the network interface hardware of one processor node (one
cluster) of this architecture. It follows the message architecture proposed
for the MIT M-Machine in W. S. Lee, *Efficient Message Subsystem Design*
(MIT, 1994). The state machines, the register organisation, the message
format and the throttling rules come from that design. Widths, encodings,
handshakes and several corner cases are choices made here. They are listed
in [Choices made here](#choices-made-here).

## The pieces

```
                 processor (issue stage, register writes)         network
                   |            |                 |                  ^
             SEND  v   MC/CC    v                 |                  | words, head/tail,
        +-----------------+  +---------------+    |                  | node, priority
        | send_validation |  |  mc_regfile   |    |                  |
        | (stall / fault) |  | 2 banks x 12  |    |          +--------------+
        +-----------------+  | + presence    |    |          | net_out_ctrl |
           | req    ^ grant  | + CC regs     |<---+----------|  IDLE/BUSY/  |
           v        |        +---------------+  read port 1  | INJECT/WB    |
        ---------------------------------------------------->|              |
                               +------+  lookup              +--------------+
                               | gtlb |<-------------------------/   |
                               +------+  node / miss                 | decrement
                               +------+                              v
                               | ombc |<-- software load / +1 / -1 (Acknowledges)
                               +------+--> zero: user SENDs stall, event to system

        network ---> net_in_unit (priority 0) = msg_fifo + net_in_ctrl ---> R_head / R_body
        network ---> net_in_unit (priority 1) = msg_fifo + net_in_ctrl ---> R_head / R_body
```

| module            | what it is |
|-------------------|-----------------------------------------------------------|
| `msg_pkg`         | word, pointer, node-ID, SEND and GTLB-entry types; constants |
| `mc_regfile`      | 2 banks of 12 MC registers with presence bits; condition-code registers |
| `send_validation` | decides, in the issue cycle, whether a SEND issues, stalls or traps |
| `gtlb`            | global TLB: virtual address to destination node |
| `net_out_ctrl`    | output controller FSM: grant, translate, inject, complete |
| `ombc`            | outstanding-message counter used for throttling |
| `msg_fifo`        | input message queue with a head tag per word |
| `net_in_ctrl`     | input controller FSM behind `R_head` / `R_body` |
| `net_in_unit`     | one input queue plus its controller, one per priority |
| `msg_subsystem`   | top level, everything wired together |

## Words, pointers and the message format

A word is 64 bits. A pointer carries its own rights and bounds: bits
[63:60] are the permission, [59:54] a segment length and [53:0] the
address. Whether an operand is a pointer at all is a tag bit that travels
beside the word (`dip_isptr`, `dest_isptr` in the SEND record). Permission
codes used here: 0 none, 1 read, 2 read/write, 3 execute, 4
*execute-message*. A handler address that a user may send has
execute-message permission. It cannot be jumped to locally; it can only be
sent.

A message on the network is:

| word | content | source |
|------|---------|--------|
| 0 | dispatch IP (handler address), permission changed from execute-message to execute | SEND operand |
| 1 | argument count = number of MC registers sent | inserted by hardware |
| 2 | sender node ID | inserted by hardware |
| 3 | destination virtual address | SEND operand |
| 4 .. 3+len | MC#0 .. MC#len-1 | MC bank named by the SEND |

The two inserted words stop a handler from being fooled about who sent a
message or how long it is. The controller also gives the network the
destination node (from the GTLB), the priority, and head/tail flags.

## Sending: what a SEND waits for

A SEND names a bank, a length (number of MC registers), a destination
pointer, a dispatch-IP pointer and a condition-code register (the
*ccreg*). Up to 10 registers of a bank are open to user threads. The two
extra registers of each bank are for system threads only.

The hard part is making the launch **atomic** without copying the message.
Two rules do it:

1. **Before issue.** The SEND does not issue until every register
   MC#0..MC#len-1 of its bank is present. A register is not present while a
   load or an arithmetic result bound for it is still in flight. The
   processor clears the presence bit when such an instruction issues and
   sets it on write-back. So a thread can issue `ld` into MC#7 and the SEND
   right after it; the SEND simply waits. While waiting, it also needs the
   output port to be free and, for throttled sends, a non-zero OMBC.
   `send_validation` computes all of this combinationally. It raises
   `stall` (with the cause on `stall_regs`, `stall_busy` or
   `stall_throttle`), `ok`, or `fault`.
2. **After issue.** The thread runs on, but the bank is still being read.
   The ccreg is the guard. The controller marks it *not present* in the
   very cycle the SEND issues. It writes it back as TRUE and present in the
   cycle after the last MC word has been read. Any instruction that tests
   the ccreg, as a predicate or as a branch condition, stalls until then. So
   a thread that wants to reuse the bank waits on the ccreg, and everything
   else proceeds.

The ccreg is cleared in the issue cycle itself, not one cycle later. A
thread can therefore never see a stale TRUE left over from an earlier
send. When the GTLB misses, the send is abandoned. The ccreg is then set
to FALSE and present, so the thread is not left stalled. The miss is a
trap: system software fills the GTLB (`gtlb_fill_*`) and repeats the
SEND.

`fault` is raised, and nothing is sent, when:

- the destination is not a pointer;
- the length exceeds 12;
- a user thread:
  - gives a dispatch IP that is not an execute-message pointer;
  - asks for priority 1;
  - uses the throttle bypass;
  - asks for more than 10 registers.

These are the simple checks the architecture needs. A complete pointer
type checker is not part of this design.

Because a message's registers survive the SEND, the same bank can be sent
again to another destination without being rewritten. This is how a
multicast is done. With two banks, a thread composes the next message in
one bank while the other is still being injected.

## The output controller, cycle by cycle

`net_out_ctrl` has four states: IDLE, BUSY, INJECT and WRITEBACK. Only
BUSY drives `grant`. With the port idle and a SEND waiting from cycle *p*:

| cycle | state | what happens |
|-------|-------|--------------|
| p     | IDLE   | request seen; SEND stalls (`stall_busy`) |
| p+1   | BUSY   | `grant`: the SEND issues (`send_ok`); operands captured; ccreg marked not present |
| p+2   | BUSY   | GTLB lookup of the destination. Hit: go to INJECT; throttled message: OMBC - 1. Miss: `gtlb_miss`, ccreg = FALSE, back to IDLE |
| p+3 .. p+len+6 | INJECT | one word per cycle while `out_ready` is high; MC reads overlap the network writes |
| p+len+7 | WRITEBACK | ccreg = TRUE, present |
| p+len+8 | IDLE | |

The read port used for injection is registered. The read of each MC
register is therefore issued in the cycle that the network accepts the
word before it. Under network
back-pressure, the word on `out_word` holds still, and this is asserted.

Consequences worth knowing:

- A message of *len* registers occupies the network for *len*+4 cycles.
- A SEND that finds the port idle still stalls one cycle (IDLE to BUSY).
- A SEND queued behind another message has its first word leave 4 cycles
  after the previous tail word.

## Where a message goes: the GTLB

The destination is a virtual address. Each GTLB entry maps a run of
virtual pages onto a box ("prism") of nodes. The fields of an entry are:

- the first virtual page (`vpn`);
- the number of pages (`vlen`);
- the starting node (x, y, z);
- log2 of the pages stored per node (`log_lppn`);
- log2 of the box extent along x, y and z.

For an address in page *P*:

```
hit      = valid && vpn <= P < vpn + vlen        (lowest-numbered entry wins)
n        = (P - vpn) >> log_lppn                 which node of the box, in order
x        = start.x + ( n                          mod 2^log_x)
y        = start.y + ((n >>  log_x)               mod 2^log_y)
z        = start.z + ((n >> (log_x + log_y))      mod 2^log_z)
```

Consecutive pages (or groups of 2^log_lppn pages) are spread over the
nodes, x first. So one entry can describe an array distributed over part
of the machine, and a loop can stride through destinations with plain
address arithmetic. The entry fields are those of the original
architecture. The arithmetic above is this design's reading of them. The
GTLB has 4 entries and is filled by software.

## Receiving: R_head, R_body and the input controller

This is the subtlest part. One handler thread per priority reads messages
through two registers. Each has a presence bit; reading a not-present
register stalls the thread.

- **`R_head`** gives the dispatch IP of the *next* message, and removes it
  from the queue. A dispatcher loop is just "jump to `R_head`". Reading
  `R_head` before the current message has been read to the end throws away
  the rest of that message. So a handler that reads fewer words than were
  sent (by mistake or by malice) cannot leave garbage for the next
  handler.
- **`R_body`** gives the next word of the current message and removes it:
  first the count, then the sender ID, the destination address and the
  arguments. Reading past the end returns a fixed error value
  (`64'hFFF0_0000_0000_0BAD`, with `body_err` high) instead of stealing a
  word of the next message.

`net_in_ctrl` has four states:

| state    | R_head | R_body | leaves on |
|----------|--------|--------|-----------|
| EMPTY    | not present | error value | a head-tagged word at the queue front: NEWMESG |
| NEWMESG  | queue front (the dispatch IP) | error value | R_head read, which pops the dispatch IP: READMESG |
| READMESG | not present | next word, popped; not present if it has not arrived; error value after the last word | R_head read: FLSHMESG; message used up and queue empty: EMPTY |
| FLSHMESG | not present | error value | every unread word of the message dropped, one per cycle, waiting for any still in transit: EMPTY |

Three details make this work:

- **Where the message ends.** Each queue entry carries a head tag on
  the first word of a message. The controller also keeps the word count
  it read from the message. A message ends when its count is used up or
  when the next head-tagged word reaches the queue front, whichever comes
  first.
- **Reading ahead of the network.** A handler may start before its whole
  message has arrived. A word that is due but not yet in the queue makes
  `R_body` not present, so the handler waits; it does not get the error
  value.
- **A stalled R_head read.** A read of `R_head` made in READMESG or
  FLSHMESG waits while the old message is flushed. It completes when the
  next message reaches NEWMESG.

Timing: a dispatch IP accepted from the network in cycle *t* is readable
through `R_head` in cycle *t*+2. A later word of a message being read is
readable through `R_body` in cycle *t*+1. The queue holds 32 words per
priority. While it is full, `in_ready` is low and the network must wait.

## Throttling and the two priorities

Each user message may be refused by a busy receiver and bounced back. The
sender must then hold it until it can be retried. The OMBC counts how
many more such messages the sender can hold:

- System software loads the OMBC (`ombc_set_*`).
- Hardware subtracts one for every user message it injects.
- The system handler adds one (`ombc_inc`) for every Acknowledge that
  comes back. `ombc_dec` exists for software to take one away.

At zero, user SENDs stall (`stall_throttle`), and `ombc_zero_event`
pulses for one cycle so that system software can act. Simultaneous
requests are summed. The count saturates at 0 and at its maximum. It
resets to 0, so user sends are off until the system enables them.

There are two priorities. Priority 0 carries user messages. Priority 1
carries system traffic such as Acknowledges. It has its own input queue
and controller, so it cannot be blocked by user traffic. Only system
threads may send on priority 1. Only a system SEND with `nothrottle` set
bypasses the OMBC. Both priorities share the one output port, and the
priority travels beside the words (`out_prio`).

## Top-level interface (`msg_subsystem`)

| group | signals | notes |
|-------|---------|-------|
| node | `my_node` | this node's (x,y,z); sent as the sender ID |
| MC registers | `mc_wr_*`, `mc_inv_*`, `mc_rd_*` | processor write (sets presence), invalidate (clears presence), read |
| condition codes | `cc_wr_*`, `cc_val`, `cc_present` | processor writes; the send's ccreg is managed by hardware |
| SEND | `send_valid`, `send` (`send_req_t`), `send_ok`, `send_stall`, `send_fault`, `stall_regs`, `stall_busy`, `stall_throttle` | `send` must be stable while `send_valid` is high; the SEND has issued in the cycle `send_ok` is high |
| GTLB | `gtlb_fill_en/idx/entry`, `gtlb_miss` | one-cycle miss pulse = trap |
| OMBC | `ombc_set_en/val`, `ombc_inc`, `ombc_dec`, `ombc_count`, `ombc_zero_event` | |
| network out | `out_valid`, `out_ready`, `out_word`, `out_head`, `out_tail`, `out_node`, `out_prio`, `out_idle` | valid/ready, one word per cycle |
| network in | `in_valid[1:0]`, `in_ready[1:0]`, `in_word[1:0]`, `in_head[1:0]` | one stream per priority; `in_head` marks the dispatch IP |
| message threads | `rd_head[1:0]`, `rd_body[1:0]`, `head_present/data`, `body_present/data/err`, `mesg_arrived`, `in_flushing`, `in_full` | hold a read until its `present` is high; it completes in that cycle |

Reset is asynchronous and active low (`rst_n`). At reset:

- MC registers are zero and present;
- CC registers are FALSE and present;
- the GTLB is empty;
- the OMBC is 0;
- the queues are empty.

## Choices made here

The architecture fixes the behaviour above; the following are this
implementation's own decisions:

- **Widths.**
  - 64-bit words.
  - The pointer layout of 4 + 6 + 54 bits, and the permission codes.
  - 5 bits per node coordinate.
  - 4 KB pages.
  - 4 condition-code registers.
  - A 16-bit OMBC.
- **Sizes.** 4 GTLB entries and 32-word input queues.
- **Handshakes.**
  - The valid/ready network interface with head/tail and side-band node and
    priority.
  - The SEND request/grant timing.
  - The registered MC read port.
  - The count and sender ID are sent as full words. They are not packed into
    a header.
- **Controller details.**
  - Lookup in the cycle after issue.
  - The ccreg cleared at issue and set to FALSE on a GTLB miss.
  - `R_head` taking priority over `R_body` when both are read in one cycle.
  - Dropping untagged words that reach an empty controller.
- **The input controller.** It waits (R_body not present) for a word that
  is due but has not arrived. The original state diagram leaves READMESG
  as soon as the queue runs empty, but the intended behaviour is for a
  handler to be able to start on a message before all of it has arrived.
  The end of a message is found from its count word.
- **Fault checks** are the minimal set listed under
  [Sending](#sending-what-a-send-waits-for).
- **The GTLB address arithmetic**, as given above.

## Measured against the original performance claims

The original architecture was compared against other machines on short
message operations. `tb_msg_workloads` runs those operations on the
default configuration with an ideal loopback network:

| operation | original estimate (processor cycles) | this RTL |
|-----------|------|----------|
| write 8 MC registers and send | 9 | SEND presented in cycle 9, issues in cycle 10 (the IDLE to BUSY cycle); 12 network words in 12 cycles |
| dispatch | 4 | `R_head` present 2 cycles after the dispatch IP arrives; the jump through it and its branch delay slots are the processor's |
| two consecutive 8-word messages from the two banks | 18 | 28 network cycles first word to last (12 + 4 idle + 12) |
| one 8-word message to two destinations | 16 | composed once, sent twice, 28 network cycles |
| 40-word block transfer as four 10-word messages, banks alternating | N + N/10 for N words | 68 network cycles (4 x 14 + 3 x 4) |

The original estimates count processor cycles and leave the network
out. The network is the limit here: a message of *len* registers needs
*len*+4 words, at one word per cycle, so a second message waits for the
port. The 4 idle cycles between back-to-back messages come from the four-state
controller: WRITEBACK, IDLE, the grant cycle and the GTLB lookup. A
controller that granted the next SEND during WRITEBACK would remove most
of them.

## Not included

These parts surround the subsystem. Their signals are ports of
`msg_subsystem`.

- **Processor side:**
  - the processor pipeline that issues SENDs and writes registers;
  - its thread-timeout watchdog, which is what breaks a SEND that waits
    forever on a register that is never written.
- **Memory side:** the local TLB (an ordinary paging TLB).
- **Network:** the interconnection network itself.
- **Software:**
  - the message handlers;
  - the dispatcher;
  - the GTLB miss handler;
  - the handling of bounced messages and Acknowledges.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5, from the directory
that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl --top-module tb_msg_subsystem \
    rtl/msg_pkg.sv tb/tb_msg_subsystem.sv
./obj_dir/Vtb_msg_subsystem
```

Replace `tb_msg_subsystem` with any testbench name. `-y rtl` lets Verilator
find each module by its file name. The package is named explicitly so that
it is compiled first. The remaining warnings are unused signals and the
reset used inside assertions; none concerns the logic.

| testbench | what it checks |
|-----------|----------------|
| `tb_msg_subsystem` | End to end at default parameters. A looped-back network that stalls at random, 200 user messages from both banks, and Acknowledges on priority 1 that drive the OMBC. Every mechanism is made to happen and counted: stall on registers, port and throttle; zero event; GTLB miss and retry; fault; back-pressure; full queue; flush; error value; R_head/R_body stalls; ccreg wait. It also checks the first message's cycle timing. |
| `tb_msg_workloads` | The operations in the table above, with their cycle counts. |
| `tb_net_out_ctrl` | Every word, flag and side-band value against a model. Also: ccreg clear/set, abort, OMBC decrement, back-pressure, len+4 and request-to-first-word timing. |
| `tb_net_in_ctrl`, `tb_net_in_unit` | The R_head/R_body rules against a queue and thread model: flush, error value, stalls on missing words, full queue. |
| `tb_send_validation`, `tb_mc_regfile`, `tb_gtlb`, `tb_ombc`, `tb_msg_fifo` | Each block against an independent model, with random stimulus. |

The block testbenches shrink the input queue (8 or 4 words) to reach the
full case quickly. The two top-level testbenches use the default
parameters.
