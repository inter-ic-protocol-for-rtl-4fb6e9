# Polled parallel key bus for a digital piano

A digital piano that scans its keys on several boards chained one after
another adds latency: a key event has to be shifted serially through each
board before it reaches the MIDI converter. When several keys move in the
same millisecond, their messages queue behind each other, so the delay grows
with the number of notes.

This design replaces the chain with a star. One **master** polls the key
boards (**slaves**) in turn over a small parallel bus. The board being polled
answers at once with its oldest key event. There is no store-and-forward
through other boards. The note number and velocity travel as whole words
rather than bit by bit. Every message is acknowledged, so master and boards
need no shared clock.

The RTL covers the full 88-key configuration: 4 boards of 22 keys each,
a 2-bit select, 7-bit velocities and 5-bit board-local note numbers. It also
turns received messages into MIDI bytes.

```
 key_down[87:0], key_vel[87:0][6:0]        (from the optical key sensing)
        |  22 keys   |  22 keys   |  22 keys   |  22 keys
   +----v----+  +----v----+  +----v----+  +----v----+
   | slave 0 |  | slave 1 |  | slave 2 |  | slave 3 |     clk_s
   | keys -> |  |  queue  |  |   ...   |  |   ...   |
   | queue ->|  |   FSM   |  |         |  |         |
   +--+---^--+  +--+---^--+  +--+---^--+  +--+---^--+
      |   |        |   |        |   |        |   |
  ====v===|========v===|========v===|========v===|====  shared CTRL/DATA/VEL
      |   +--------+---+--------+---+--------+---+----  SS[1:0], ACK
      |                                          ^
   +--v------------------------------------------+--+
   |              master_fsm      -> midi_encoder   |   clk_m
   +------------------------------------------------+
                              midi_valid, midi_bytes[3]
```

## The bus

| Lines | Width | Driven by | Meaning |
|-------|-------|-----------|---------|
| `ss`   | 2 | master | ID of the board that may write to the bus |
| `ack`  | 1 | master | toggles once for each message part received |
| `ctrl` | 2 | selected board | message type, see below |
| `data` | 8 | selected board | note number, or velocity in the second step of a note-on |
| `vel`  | 7 | selected board | velocity, used only with `DEDICATED_VEL_BUS = 1` |

The CTRL codes are defined in `piano_pkg`. Bit 1 separates a velocity word
from a note number. Bit 0 separates note-on from note-off.

| `ctrl` | Code |
|--------|------|
| `00` | note-off (DATA = note number) |
| `01` | note-on (DATA = note number) |
| `11` | velocity (DATA = velocity of the note-on just sent) |
| `10` | no-data; this is also what the bus reads when no board drives it |

## One select cycle

The master spends one *select cycle* on each board and then moves to the
next, in the order 0, 1, 2, 3, 0, … A board sends at most one message per
select cycle, so a busy board cannot starve the others.

Master (`master_fsm`):

1. Put the board's ID on `ss`. Wait `POLL_CYCLES` clocks for the board to
   answer.
2. Read CTRL.
   - **no-data:** go to the next board.
   - **note-off:** take the note number, toggle ACK and report the message.
   - **note-on:** take the note number and toggle ACK. Wait until CTRL reads
     velocity, then take the velocity, toggle ACK and report the message.
3. Wait until the board drops back to no-data, then go to the next board.

Board (`slave_fsm`):

1. Wait until `ss` equals the board's ID.
2. If the queue is empty, drive no-data.
3. Otherwise put out the oldest event.
   - A note-off is one step.
   - A note-on is two steps: the note number, then, after the ACK toggle,
     the velocity.
4. After the last ACK, remove the event from the queue and drive no-data.
5. Wait until `ss` moves away before the board may answer again.

"ACK received" means that ACK now differs from its level when the current
step was put on the bus. The master therefore never has to return ACK to a
resting level.

If the master moves on before a message is complete, the board stops
driving. This happens when `POLL_CYCLES` is too short for the board's
reaction time. The event stays in the queue and is sent again in the board's
next select cycle. Nothing is lost and nothing is sent twice.

With `DEDICATED_VEL_BUS = 1` a note-on is a single step. The note number goes
on DATA and the velocity on VEL at the same time, and one ACK completes the
message. This is the faster variant proposed for a final product. The default
is the two-step note-on over the shared DATA word.

Measured select-cycle lengths, in master clocks, at the defaults (master
10 ns, boards 13 ns, `POLL_CYCLES = 16`):

| Select cycle | Master clocks |
|--------------|---------------|
| empty board | 17 (`POLL_CYCLES` + 1; exact, checked by `tb_master_fsm`) |
| note-off | 24 |
| note-on, two-step | 31 |

## Crossing between the boards' and the master's clocks

Master and boards share no clock. `clk_m` and `clk_s` may be unrelated.
Every line that crosses between them goes through `sync_stable` at the
receiving side, which has three parts:

- two flip-flops that guard against metastability;
- a third stage;
- a `stable` flag, high when the last two stages agree.

The receiver acts on a bundle only when the whole bundle (CTRL+DATA+VEL, or
SS+ACK) has read the same value on two consecutive clocks. A sender changes
its lines at most once per handshake step. A stable bundle therefore never
mixes old and new bits, even when a 2-bit code such as no-data → note-on
changes both bits at once.

A board reacts 4–5 of its clocks after SS changes. The master sees the
answer 4 of its clocks later. **`POLL_CYCLES` must cover that round trip.**
16 master clocks is enough while the board clock period is no more than
about 1.5 times the master's. Scale `POLL_CYCLES` up for slower boards. A
value that is too short costs speed (aborted messages), not correctness.

In `piano_bus_top` all four boards share `clk_s`. When the selection moves,
the old board releases the bus on the same edge that the new board takes it.
The top asserts that two boards never drive at once
(`a_one_driver`). It also asserts that ACK only toggles while a board drives
the bus (`a_ack_to_driver`). With a separate clock per board, the handover
could overlap by a clock. Real hardware would need open-drain lines or a gap
between select cycles.

## Inside a board

`slave_device` is made of `key_monitor`, `event_fifo` and `slave_fsm`.

- **`key_monitor`** watches 22 key-down inputs.
  - A press sets the key's pending note-on bit and stores the velocity
    present at that clock. A release sets its pending note-off bit.
  - Each clock, the lowest-numbered key with a pending event is offered to
    the queue.
  - A key holds at most one pending note-on and one pending note-off. A
    flag keeps the two in the order they happened.
  - When the queue is full, events wait in these bits, so none is lost.
    The one loss: a key pressed, released and pressed again before its
    first event left sends only one press.
- **`event_fifo`** is a 16-entry show-ahead queue of
  `{on, note[4:0], vel[6:0]}`. `rd_data` is always the oldest entry. The FSM
  removes an entry only after its last ACK.
- **`slave_fsm`** is the bus side described above.

When all 22 keys of a board go down in one clock, 16 events enter the queue.
The other 6 wait in the key monitor until the master drains the queue. The
top-level test does exactly this.

## MIDI output

`midi_encoder` gives each key a global number: board × 22 + local key. It
maps this number to a MIDI note from `NOTE_BASE` = 21 (A0), so the keys span
MIDI notes 21–108. Each message becomes three bytes, one clock after the
master reports it:

- status byte: `0x90|ch` for note-on, `0x80|ch` for note-off;
- note number;
- velocity. A note-off carries a release velocity of 64.

A global number above 127 raises `range_error` instead. This cannot happen at
the default sizes. The USB MIDI device itself is not included:
`midi_valid`/`midi_bytes` are the hand-off point.

## Parameters (`piano_bus_top`)

| Parameter | Default | Origin |
|-----------|---------|--------|
| `N_SLAVES` | 4 | 88 keys over 4 boards (source design) |
| `SS_W` | 2 | select width for 4 boards (source design) |
| `KEYS_PER_SLAVE` | 22 | source design |
| `POLL_CYCLES` | 16 | chosen here; see the clock-crossing section |
| `FIFO_DEPTH` | 16 | chosen here |
| `DEDICATED_VEL_BUS` | 0 | 0 = two-step note-on (source flow charts), 1 = separate velocity lines (source's final-product proposal) |
| `NOTE_BASE` | 21 | chosen here (MIDI note of A0) |
| `MIDI_CHANNEL` | 0 | chosen here |

The widths are constants in `piano_pkg`: `VEL_W` = 7, `NOTE_W` = 5 and
`DATA_W` = 8.

## Performance

These figures come from simulating the top at its defaults. Clock counts
are master clocks.

- One key on an idle system reaches the MIDI output 46 clocks after it goes
  down (38 with the dedicated velocity lines). The worst case adds one round
  of empty polls.
- A three-key chord on three boards is complete after 119 clocks.
- All 88 keys pressed in one clock are delivered in 3076 clocks, about 35
  per note-on (2255, about 26, with dedicated velocity lines).

- Random sets of 1, 2 and 3 keys pressed in the same clock are delivered
  within about 25–93, 58–162 and 97–195 clocks (40 random trials each; the
  exact spread depends on the random seed). The spread comes
  only from where the poller happens to be when the keys go down.
- Under a sustained load, with every key moved again as soon as its last
  move has arrived, the bus carries about one MIDI message per 30 clocks.

At a 66 MHz clock the burst figure is about 1,900 note-on messages per
millisecond. That is well above the target of roughly 300 per millisecond,
and far above what MIDI's 1 ms resolution and a pianist's hands need.

## Where this RTL departs from, or adds to, the source design

The published protocol gives the bus signals, their meaning, the
master's and the board's flow charts, the round robin over four boards and
the final sizes. The following are this implementation's own:

- The CTRL code for no-data. The bit meanings of the other three codes
  follow the source.
- `DATA` is 8 bits wide, as in the source's prototype. A final board with
  separate velocity lines would need only 5 bits there, which gives the 39
  board pins counted in the source (22 keys + 5 + 7 + 2 + 1 + 2).
- The synchronisers, the stability rule and the `POLL_CYCLES` default.
- The master reads CTRL once, when the poll wait ends, as the flow chart
  draws it. It does not watch CTRL during the wait.
- Key sensing is one key-down line and one 7-bit velocity per key. The
  source only says that the optics deliver a velocity and a note number.
- The pending-bit key monitor, its lowest-key-first order, and the queue
  depth.
- Events stay queued until fully acknowledged. A message aborted by
  deselection is retried.
- A velocity code at the start of a message is reported on `proto_error`.
  The master then waits for no-data.
- The bus is modelled as gated OR logic with an enable per board. Idle lines
  read no-data, as pull resistors would make them.
- The MIDI byte layout follows the MIDI standard. The key numbering from A0
  = 21 is chosen here.
- The active-low asynchronous reset `rst_n` is shared by both clock
  domains.

Not included: the optical key sensors and their velocity estimation, the
USB MIDI device, and the synthesizer. Their signals are ports of the top.

## Files

| File | Contents |
|------|----------|
| `rtl/piano_pkg.sv` | widths, CTRL codes, key event struct |
| `rtl/sync_stable.sv` | receive-side synchroniser with stability flag |
| `rtl/key_monitor.sv`, `rtl/event_fifo.sv`, `rtl/slave_fsm.sv` | board parts |
| `rtl/slave_device.sv` | one board |
| `rtl/shared_bus.sv` | the shared CTRL/DATA/VEL lines |
| `rtl/master_fsm.sv` | poller and handshake |
| `rtl/midi_encoder.sv` | message → MIDI bytes |
| `rtl/piano_bus_top.sv` | the 88-key system |
| `tb/tb_<block>.sv` | self-checking testbench per block |
| `tb/tb_piano_bus_top.sv` | whole system at default parameters |
| `tb/tb_piano_bus_top_dedicated.sv` | whole system with dedicated velocity lines and 4-entry queues |
| `tb/tb_workloads.sv` | polyphony delay and sustained message rate at default parameters |

## Simulating

Each testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_piano_bus_top \
    -y rtl -y tb +libext+.sv rtl/piano_pkg.sv tb/tb_piano_bus_top.sv
./obj_dir/Vtb_piano_bus_top
```

Replace `tb_piano_bus_top` with any other testbench name. The whole-system
runs take a few seconds. All registers are reset, so the results do not
depend on Verilator's random initial values. To lint or synthesise a single
module, name `rtl/piano_pkg.sv` first and give `-y rtl` for the modules it
uses.
