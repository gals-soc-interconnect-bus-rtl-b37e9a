# A clock-stopping GALS interconnect bus for sensor-node SoCs

A wireless sensor node spends almost all of its life doing nothing. Its
processing units (PUs) - a small CPU plus hardware accelerators such as a
CRC engine or an ADC controller - each want their own clock and supply
voltage, and each wants to be switched off whenever it can be. A
conventional synchronous, master/slave bus fits that badly: it needs a
common clock and every slave must be awake to answer.

This RTL implements a bus built for that situation:

* **One shared 8-bit line** carries IDs and data alike, plus three control
  lines (`bus_arbiter_ctrl`, `bus_last_byte`, `bus_ready`) and one request
  line per PU.
* **The bus has its own clock**, `bus_clk`, made by the arbiter, and it
  runs only while a message is in flight. An idle bus draws no dynamic
  power except for the arbiter.
* **Every agent is a peer.** Any PU can send a message to any other PU.
  There is no master and no slave.
* **PUs keep their own clocks.** Each PU attaches through an interface block
  whose PU side is a pointer-and-handshake protocol that needs no common
  clock.
* **A receiver may be asleep or busy.** A scheduler on the bus catches every
  message that nobody accepted. It stores the message, asks a power
  controller to wake the destination, and sends the message again later.

Around the bus there is a small demonstrator: a timer, an LED unit, a
random-number unit and a CRC unit, at the IDs of a seven-PU test system.

## Contents

| File | What it is |
|---|---|
| `rtl/gals_bus_pkg.sv` | `bus_t` struct of the shared lines, frame-position enum, constants |
| `rtl/gals_bus_lines.sv` | wired-OR / wired-AND resolution of the shared lines |
| `rtl/gals_arbiter.sv` | grant selection, bus clock generation, burst close, bus regain |
| `rtl/gals_tx.sv` | transmit half of a PU interface |
| `rtl/gals_rx.sv` | receive half of a PU interface, with its RAM |
| `rtl/gals_interface.sv` | `gals_tx` + `gals_rx` sharing one ID |
| `rtl/gals_scheduler.sv` | store-and-retry unit for refused messages |
| `rtl/gals_soc_bus.sv` | the bus: arbiter, scheduler, `NUM_PU` interfaces, line resolution |
| `rtl/gals_pu_shell.sv` | helper that turns the interface handshakes into "frame in / frame out" for a PU core |
| `rtl/gals_timer_pu.sv`, `gals_leds_pu.sv`, `gals_lfsr_pu.sv`, `gals_crc_pu.sv` | demonstrator PUs |
| `rtl/gals_test_system.sv` | top level: the bus plus the demonstrator PUs |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_pu_link.sv` | testbench model of a PU's side of an interface |
| `tb/tb_sweep_unit.sv` | a bus of N scripted PUs, used by `tb_gals_pu_sweep` |

## Messages and IDs

Every agent has an 8-bit ID. `00h` is reserved: on the bus it means "idle,
nobody is granted". A message (a *frame*) is a sequence of bytes:

```
byte 0   destination ID
byte 1   source ID
byte 2.. payload
```

The bus itself only looks at byte 0. The source byte is a convention that
lets the receiver reply and lets the scheduler resend a frame unchanged.
The receiver stores the whole frame, destination byte included.

With the default parameters the IDs are `ID_BASE + line`:

| Request line | ID | Agent |
|---|---|---|
| 0 | 30h | scheduler |
| 1 | 31h | timer |
| 2 | 32h | LEDs |
| 3 | 33h | UART (ports only) |
| 4 | 34h | LFSR (random numbers) |
| 5 | 35h | CRC |
| 6 | 36h | ADC control 1 (ports only) |
| 7 | 37h | ADC control 2 (ports only) |

## A transmission, edge by edge

This is the heart of the design. Everything below counts **rising edges of
`bus_clk`**. The arbiter changes its outputs only while `bus_clk` is low,
so every line is stable at every rising edge.

```
edge              1     2     3     4     5     6
bus_arbiter_ctrl  1     0     0     0     0     1     (then the clock stops)
bus_data          33h   -     34h   33h   31h   00h
bus_last_byte     0     0     0     0     1     0
bus_ready         1     1     1     0     1     1
                  grant hand  dest  src   data  idle
                        over
```

The table shows what every agent samples at each rising edge for one
3-byte frame: PU 33h sends `{34h, 33h, 31h}` to PU 34h, and nobody else
wants the bus.

1. **Request.** A PU's transmit block raises its `bus_request` line. The
   arbiter synchronises the line into `sys_clk` with two flip-flops. The bus
   clock is stopped, so the request cannot wait for it.
2. **Grant (edge 1).** The arbiter raises `bus_arbiter_ctrl`, puts the
   chosen ID on `bus_data`, and starts `bus_clk`. At edge 1 every awake
   agent samples the grant. The transmit block whose ID matches raises
   `message_being_sent` and drops its request.
3. **Hand-over (edge 2).** The arbiter releases the lines. After edge 2 the
   granted sender drives the destination byte.
4. **Destination (edge 3).** Every awake receiver samples byte 0. The one
   whose ID matches, if it is free, pulls `bus_ready` low for one cycle, and
   that low is seen at edge 4.
5. **Body (edges 4 ...).** The sender drives one byte per cycle from its
   PU's memory. It raises `bus_last_byte` together with the last byte, and
   releases the bus at the edge that samples it.
6. **Next grant or close.** The arbiter takes the lines back at once. If
   another request is pending, it puts that requester's ID out and the
   sequence restarts at step 2 with no idle gap. This is a *concatenated*
   transmission. If no request is pending, it sends `00h`, and after the
   edge that samples `00h` it stops the clock.

With the default clock ratio a frame of L bytes therefore costs L + 2 bus
cycles, and closing the burst costs one more.

**What if the sender never raises `bus_last_byte`?** Perhaps it was switched
off in mid-frame. The arbiter counts edges after each grant. After
`MAX_LEN + 2` edges with no last byte it raises `bus_arbiter_ctrl` again,
and the `regain_o` output pulses. A transmit block that sees
`bus_arbiter_ctrl` high while it is sending stops at once. A receiver that
sees it before the last byte throws the partial frame away.

## Accepting or refusing: `bus_ready` and the scheduler

`bus_ready` is the only line that runs from receivers back to senders. It is
resolved as a wired AND and is high when nobody drives it:

* **low**: the destination exists, is awake and has room. It has taken the
  frame.
* **high**: the destination is busy because it still holds an unread
  frame, or it is asleep, or it does not exist. It looks the same in all
  three cases.

The scheduler (ID 30h) uses that one bit to make the bus delay tolerant:

* **Speculative capture.** The scheduler copies *every* frame on the bus
  into the free slot at the tail of its queue, which holds `SLOTS` frames of
  `DEPTH` bytes. It has to start copying before it knows whether the frame
  will be refused.
* **Keep or discard.** At edge 4 it samples `bus_ready`. If the line is low,
  the copy is discarded. If it is high, the copy is kept once the last byte
  has arrived. Its own frames and frames addressed to 30h are never copied.
* **Overflow.** A refused frame that arrives while all slots are full is
  lost, and `drop_count` counts it.
* **Waking the receiver.** While the queue holds anything, `wake_req` is
  high and `wake_id` is the destination of the oldest frame. These outputs
  are meant for a power controller, which is not part of this RTL. In the
  demonstrator it would clear the matching `pu_asleep` bit.
* **Retry.** A small controller on the always-running `sys_clk` plays the PU
  for the scheduler's own transmit block. `RETRY_CYCLES` cycles after a
  frame was stored, or after the last attempt ended, it requests the bus and
  resends the oldest frame byte for byte, original source ID included. The
  receiver sees exactly the frame that was first sent.
* **Did the retry work?** The scheduler watches `bus_ready` during its own
  frame. If the frame was accepted, it leaves the queue at the arbiter's
  next byte. It is removed there rather than at the last byte, because the
  transmit block is still reading the slot until then. If the frame was
  refused again, it stays at the head and is retried after another
  `RETRY_CYCLES`.

The queue is strictly first-in first-out. A frame for a PU that stays
asleep for a long time, or for an ID that does not exist, holds up the
frames behind it.

## The arbiter's tables

* **Priority.** `PRIO_RANK[line]` is a 4-bit rank, and the lowest rank wins.
  Ties go to the lowest line number. Under contention the line granted last
  is masked out, so no PU gets the bus twice in a row while another waits.
  By default every rank is 0: the lowest requesting line wins, except that it cannot win twice in a row while others wait.
* **Bus rate.** The sender's line selects `CLK_DIV[line]`. While that
  sender's frame is on the bus, the half period of `bus_clk` is
  `CLK_DIV[line]` `sys_clk` cycles. The rate can therefore follow the
  voltage/frequency state of the PUs involved. The default is 1 everywhere,
  giving `bus_clk` = `sys_clk` / 2.

## The interface, seen from a PU

The PU side of `gals_interface` uses no bus clock at all. Both halves read
memory *asynchronously* through pointers, so the PU and the bus never have
to agree on a clock.

**Transmit (`gals_tx`).**

1. The PU writes the frame into its own memory.
2. It sets `write_pointer` to the number of bytes and raises
   `send_request`.
3. The block drives `read_pointer` and expects `data` to follow it
   combinationally, as `data = mem[read_pointer]`.
4. `message_being_sent` rises at the grant. The PU then lowers
   `send_request`.
5. `message_being_sent` falls after the last byte. The PU may now start the
   next message.

`bus_request` is simply `send_request && !message_being_sent`. The pointer
width `Q` = 5 allows frames of up to 31 bytes.

**Receive (`gals_rx`).**

1. A matching frame is stored at addresses 0, 1, 2 ... of a `DEPTH`-byte
   RAM inside the block.
2. After the last byte `waiting_read` rises and `write_pointer` holds the
   length.
3. The PU reads `data = ram[read_pointer]` at its own pace and then raises
   `clear_indication`.
4. The bus clock may be stopped at this point, so `clear_indication` clears
   `waiting_read` asynchronously.
5. The block stays busy, refusing frames, until `clear_indication` is low
   again.

An `asleep` input models a powered-down interface: the block ignores the
bus and never pulls `bus_ready`. A frame longer than `DEPTH` keeps its first
`DEPTH` bytes.

`gals_pu_shell` packages both handshakes for a simple PU core:

* It synchronises `waiting_read` and `message_being_sent` into the PU clock.
* It copies a received frame out byte by byte.
* It holds a reply frame for the transmit block to read.

## The demonstrator PUs

Each PU has its own clock input. All of them use frames of the form
`{destination, source, command, arguments}`, and a reply carries
`command | 80h`.

| Unit | Behaviour |
|---|---|
| Timer 31h | Every `TIMER_PERIOD` timer clocks it sends `{32h, 31h, 01h, 01h}`, which toggles LED 0. The default of 500 000 gives 0.5 s at a 1 MHz timer clock. |
| LEDs 32h | 3-bit register on `leds`. `01h m` toggles the bits in `m`, `02h v` loads `v`, `03h` replies `{src, 32h, 83h, leds}`. |
| LFSR 34h | 16-bit LFSR x^16+x^14+x^13+x^11+1, seed ACE1h, stepping every clock. `01h` replies `{src, 34h, 81h, hi, lo}`. The value is also on `lfsr_value`. |
| CRC 35h | `01h d0 d1 ...` replies `{src, 35h, 81h, crc_hi, crc_lo}`. The CRC is CRC-16/CCITT with polynomial 1021h, initial value FFFFh, no reflection and no final XOR, so "123456789" gives 29B1h. It is computed bit-serially, one bit per clock. At most `FB` - 3 = 13 data bytes are used. |

The UART bridge (33h) and the two ADC controllers (36h, 37h) are not
included. Their PU-side interface ports appear on `gals_test_system` as the
`ext_*` arrays, with index 0 = 33h, 1 = 36h and 2 = 37h. An external or
future PU can be attached there.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `gals_soc_bus` | `NUM_PU` | 7 | PU interfaces (IDs `ID_BASE`+1 ...) |
| | `ID_BASE` | 30h | scheduler ID; PU k gets `ID_BASE`+k+1 |
| | `Q` | 5 | TX pointer width; `MAX_LEN` = 2^Q - 1 = 31 bytes |
| | `DEPTH`, `P` | 16, 5 | RX RAM bytes and RX pointer width |
| | `SLOTS` | 4 | scheduler queue entries of `DEPTH` bytes |
| | `RETRY_CYCLES` | 64 | `sys_clk` cycles between retries |
| | `PRIO_RANK`, `CLK_DIV` | all 0, all 1 | arbiter tables, one entry per request line |
| `gals_test_system` | `TIMER_PERIOD` | 500 000 | timer clocks per tick |

IDs are 8 bits, so the bus could in principle carry 255 agents, but the
arbiter's request vector grows with `NUM_PU`. For that many agents, set
`ID_BASE` = 01h and raise `NUM_PU`.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and calls `$finish`, and a watchdog ends
a hung run. With Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/gals_bus_pkg.sv tb/tb_gals_test_system.sv \
    --top-module tb_gals_test_system -o sim
./obj_dir/sim
```

To run another testbench, replace the testbench name in both places. The
package file has to come first, and `-y rtl -y tb` lets Verilator find
every other module.

| Testbench | What it exercises |
|---|---|
| `tb_gals_test_system` | Whole system at default parameters, including the 500 000-cycle timer, over about 10 ms of simulated time. Covers LED load/toggle/query, two LFSR queries, the CRC of "123456789", a frame between the ADC positions, a frame to a sleeping PU delivered after wake-up, and two timer ticks. |
| `tb_gals_soc_bus` | The bus at its defaults, with scripted PUs. Covers the two examples above (a single frame, then a reply after an idle gap; four concatenated frames), busy and asleep receivers, scheduler retry and wake-up, contention, and regain from a sender that goes silent. It counts each mechanism (idle close, clock stop, chained grants, regain, scheduler store, resend, wake request, overflow) and fails if one never happened. |
| `tb_gals_pu_sweep` | Seven buses of 2 to 8 PUs side by side. For each size it checks the cost of one 4-byte frame (7 bus edges), the cost of a burst where every PU sends at once (6 edges per frame + 1), every delivered byte, and a stopped clock during idle. It prints the edge counts per size: active switching grows with the PU count while idle switching stays at zero. |
| `tb_gals_arbiter` | Priorities, the no-repeat mask, per-line clock dividers and the regain timeout. |
| `tb_gals_scheduler` | Capture, discard on acceptance, retry, overflow drops. |
| the rest | One block each: TX and RX edge timing and handshakes, line resolution, and each demonstrator PU against an independent model. |

The testbenches use two-state simulation. They raise and then drop `rst_n`
at time 1 so that the asynchronous resets fire.

## Where this design departs from the original bus, and what it adds

* **No tristate lines.** The original bus has physical shared lines, and an
  asleep receiver leaves `bus_ready` floating. Here each agent drives an
  enable-gated value, and `gals_bus_lines` resolves them:
  * `bus_data` is the arbiter's byte while `bus_arbiter_ctrl` is high, and
    otherwise the OR of the transmit blocks.
  * `bus_last_byte` is an OR of the transmit blocks.
  * `bus_ready` is an AND of the receivers, so "released" reads as 1.
  The polarity is the original's: a busy receiver leaves the line high.
  What an accepting receiver does is not specified there. Here it pulls the
  line low for one cycle.
* **The frame layout** (destination, source, payload) and the reserved ID
  `00h` for idle match the published examples. The rule that the receiver
  stores the destination byte is this design's.
* **The scheduler's ID (30h), its queue size, the retry timer and the
  `wake_req`/`wake_id` outputs** are this design's. The original only says
  that the scheduler stores refused messages, resends them, and asks a
  voltage-control PU to wake the receiver.
* **Voltage control and power gating** are outside the RTL. `asleep` and
  `pu_asleep` inputs stand in for them.
* **The arbiter's tables** are parameters. Their contents, the two-flop
  request synchroniser, indexing the clock table by the sender, and the
  `MAX_LEN + 2` regain limit are choices made here.
* **The demonstrator PUs'** command codes, reply formats, LFSR polynomial,
  CRC initial value and timer clock frequency are all this design's. Only
  their roles and IDs, the 0.5 s timer interval and the CCITT CRC come from
  the original system.
* **Not included:** the UART bridge, the ADC controllers (their serial ADC
  protocol is unspecified) and the voltage-control PU.

## Size

Generic-cell synthesis of the defaults gives the bus (`gals_soc_bus`)
about 1300 cells and 300 flip-flops. Its 1.7 kbit of register-file storage
breaks down as follows:

* the seven 16-byte RX RAMs
* the scheduler's four 16-byte slots and their lengths
* the arbiter's priority and clock tables

The whole demonstrator is about 1800 cells and 840 flip-flops. The PUs'
frame copies account for most of the increase.
