# Power-managed protocol processor for a wireless sensor node

A sensor node has to run for years on a battery or on harvested energy, but it
is idle almost all of the time. This processor therefore splits its protocol
stack into **eight power domains** (PDs) that roughly follow the protocol
layers, and lets a **central power manager** (PM) put each one to sleep
whenever it is not needed. Sleep does not cut the supply: it lowers the
domain's rail from the nominal 1.0 V (`vddhi`) to a **data retention voltage**
(`vddlo`, 0.3 V and up) at which the logic keeps its state but leaks far less.
Nothing has to be saved or restored, so a domain can be switched in either
direction within **one clock cycle**. That speed is what allows a very simple,
purely reactive power policy.

The chip runs from an 8 MHz main clock; an 80 kHz time base, derived from it,
serves as a shared alarm clock for all domains.

## What this RTL contains

| Power domain | Index | Contents | In this RTL |
|---|---|---|---|
| `if` | 0 | SPI, I2C and GPIO interfaces | external: PIF port only |
| `baseband` | 1 | digital part of the on-off-keyed radio baseband | external: PIF port only |
| `serial` | 2 | serial console | external: PIF port only |
| `neighbor` | 3 | neighbourhood table | external: PIF port only |
| `location` | 4 | position calculation from anchor nodes | external: PIF port only |
| `queues` | 5 | 1 kB TX and 1 kB RX packet queues | **built** (`packet_queues`) |
| `dw8051` | 6 | 8051-compatible microcontroller (application and network layers) with 64 kB code/data RAM | **RAM built** (`sram_sp`); the core is external |
| `dll` | 7 | data-link layer | external: PIF port only |

The power-management machinery is complete: the PM (`power_manager`) with its
per-domain interface decoders (`pif_decode`), the time wheel (`time_wheel`)
and alarm selection (`alarm_sorter`); one power-switch model per domain
(`power_switch`); and the isolation cells (`signal_wall`). The protocol
subsystems themselves (8051 core, DLL, baseband, neighbour and location
engines, interfaces, JTAG), the crystal oscillator and the `vddlo` converter
are not part of this RTL. Each of them meets the top level `charm_top` as plain
ports: its PIF request and status, its buffered switch control and its modelled
supply voltage, and, for the microcontroller and the DLL, their sides of the
queues and the RAM.

## The reactive power policy

Every domain groups its I/O signals into **ports** (four per domain here).
Communication between layers happens in bursts, such as one packet, so a
port is used like a session: the domain opens it, moves the data, and closes
it. The PM holds, for each domain:

* the open/closed bit of each of its ports;
* a **can_sleep** bit;
* for each of its ports, an optional **connection** to one port of another
  domain (programmed by software).

From this state the PM recomputes every cycle whether each domain must be
awake. A domain is awake if **any** of these holds:

1. its can_sleep bit is clear (the domain is busy with work of its own);
2. one of its own ports is open;
3. a port of another domain that is connected to one of its ports is open;
4. power control is disabled (all domains then stay awake).

Otherwise it sleeps. Rule 3 is what makes sessions work: when the
microcontroller opens its port 0, which is connected to port 0 of `queues`, the
queues domain wakes in the same cycle and stays awake exactly as long as that
port is open. The target domain sees the session in `pif_rsp[pd].peer_open`.

**Timing.** The awake vector is a register loaded from the *next* state. A PIF
request or configuration write sampled at clock edge *k* changes `pd_awake`
at edge *k*, so the domain is awake (or asleep) from the very next cycle.
Requests are accepted only from an awake domain (`ack` is then high in the
same cycle). A sleeping domain cannot ask to be woken; only a connected
session, its alarm, or software clearing its can_sleep bit can wake it.

## Virtual alarms and the time wheel

Protocols need timers (sampling periods, timeouts), and a counter inside a
domain would keep that domain awake. Instead the PM keeps the only counter: a
24-bit **time wheel** that advances once every 100 main-clock cycles (80 kHz,
implemented as a one-cycle enable `timer_tick`, not as a second clock). It
wraps after 2^24 / 80 kHz, about 210 s.

A domain arms an alarm with the PIF message `SET_ALARM` and a delay `d` in
timer ticks; the PM stores `now + d`. Each domain has one alarm. Rather than
comparing all eight with the counter, `alarm_sorter` picks the **most urgent**
one: the smallest signed distance `alarm_time - now` taken as a 24-bit two's
complement number, lowest domain index on ties. That choice is registered, and a
single comparator checks whether it is due (distance <= 0). "Due" rather than
"equal" means an alarm whose tick has already passed still fires, for example
the second of two alarms set for the same tick. The price: an alarm may be at
most 2^23 - 1 ticks (about 105 s) ahead.

When an alarm expires the PM, in one step:

* clears the alarm;
* clears the domain's **can_sleep** bit, so the domain wakes and *stays* awake;
* pulses `pif_rsp[pd].alarm` for one cycle, together with `awake` rising.

The domain goes back to sleep by sending `CAN_SLEEP` with `arg[0] = 1` when its
work is done. An alarm is reported at most two main-clock cycles after the
time wheel reaches it (one cycle for the registered selection, one for the
registered pulse). `CLR_ALARM` cancels an armed alarm.

## Power InterFace (PIF)

Each domain has the same interface to the PM, defined in `charm_pkg`:

`pif_req_t` (domain to PM, 30 bits): `valid`, `op` (3 bits), `port` (2 bits),
`arg` (24 bits).

| `op` | Meaning |
|---|---|
| `PIF_NOP` (0) | nothing |
| `PIF_OPEN` (1) | open own port `port` |
| `PIF_CLOSE` (2) | close own port `port` |
| `PIF_SET_ALARM` (3) | wake me `arg` timer ticks from now |
| `PIF_CLR_ALARM` (4) | cancel my alarm |
| `PIF_CAN_SLEEP` (5) | set my can_sleep bit to `arg[0]` |

`pif_rsp_t` (PM to domain): `awake`, `ack` (combinational, same cycle as
`valid`), `alarm` (one-cycle pulse), `port_open[3:0]`, `peer_open[3:0]`.

A request is a single-cycle strobe; there is no back-pressure, because the PM
accepts every request from an awake domain at once. If one domain's `CAN_SLEEP`
message and a configuration write of the can_sleep register come in the same
cycle, the message wins; an expiring alarm wins over both.

## Configuration registers

Software (the microcontroller) programs the PM through a simple register port
(`cfg_we`, `cfg_addr[7:0]`, `cfg_wdata[31:0]`, combinational `cfg_rdata`):

| Address | Access | Contents |
|---|---|---|
| `0x00`-`0x1F` | R/W | connection of port (`pd`, `port`) at `pd*4 + port`: bit 5 valid, bits 4:2 target domain, bits 1:0 target port |
| `0x20` | R/W | can_sleep bits, one per domain |
| `0x21` | R/W | bit 0: power control enable |
| `0x22` | R | awake vector |
| `0x23` | R | time wheel |
| `0x24` | R | open-port matrix, bit `pd*4 + port` |

After reset, power control is disabled, every can_sleep bit is clear, all
ports are closed, no alarm is armed and every domain is awake. Software
programs the connections, sets the can_sleep bits and then enables power
control. A connection write takes effect from the following cycle.

## Power switches and signal walls

`power_switch` is a **behavioural model**, not synthesizable logic. It stands
for the chain of switch cells that connects a domain's virtual supply either
to `vddhi` or to `vddlo`. The control `awake` passes two inverters; the output
of the first drives both switch devices, and the second restores the polarity
as `awake_buf`, so that cells placed along the power grid form a buffer tree.
Here the virtual supply is the real-valued output `vvdd` (parameters
`VDDHI = 1.0`, `VDDLO = 0.3`). The top level exposes it as `pd_vvdd[pd]`.

`signal_wall` keeps a sleeping domain from seeing or producing garbage. Each
bit is passed only when the domain is enabled and the port is open;
otherwise it is tied to ground, which is never switched off:
`gated = (pd_en && open) ? hot : 0`. In `charm_top`:

* every domain's PIF request passes a wall enabled by that domain's buffered
  `awake` (with `open` tied high), so a sleeping domain can issue nothing;
* the inputs and outputs of the queues domain pass walls enabled by the
  queues' `awake`. The network side is gated by queues port 0 and the DLL side
  by queues port 1, each open if the queues domain itself or a connected
  domain has opened it.

A walled output reads as zero. Note that for the queue status flags this means
"not full" and "not empty": a side must open its session before it looks at
them.

## Packet queues

`packet_queue` is a byte FIFO of `DEPTH` = 1024 entries with independent write
and read sides. A read returns its byte on the edge after `rd_en`. A write to a
full queue or a read from an empty one is ignored. `packet_queues` pairs two of
them: the network layer writes TX and the DLL reads it; the DLL writes RX and
the network layer reads it. Because the queues have their own domain, each
side can fill or drain them while the other side sleeps. The contents survive
the queues' own sleep as well, since sleep keeps the state.

## Program/data RAM

`sram_sp` is a single-port synchronous RAM, 65536 x 8 bits, written as an
array so that synthesis maps it to a memory. With `en` high, `we` selects a
write or a read; read data appears after the clock edge and is held while `en`
is low.

## Files

* `rtl/charm_pkg.sv`: domain indices, PIF types and op codes, register
  addresses, sizes.
* `rtl/charm_top.sv`: top level.
* `rtl/power_manager.sv`, `rtl/pif_decode.sv`, `rtl/alarm_sorter.sv`,
  `rtl/time_wheel.sv`: power manager.
* `rtl/power_switch.sv` (behavioural), `rtl/signal_wall.sv`: domain boundary.
* `rtl/packet_queue.sv`, `rtl/packet_queues.sv`, `rtl/sram_sp.sv`: memories.
* `tb/tb_<module>.sv`: one self-checking testbench per module;
  `tb/tb_rx_sampling.sv`: a long run of periodic channel sampling.

Every module's parameter defaults are the full-size values: 8 domains, 24-bit
time wheel, divider 100, 1 kB queues, 64 kB RAM.

## Simulation

All testbenches are self-checking. Each prints
`TB_RESULT checks=<n> failures=<m>` and stops; a watchdog ends a hung run with
a failure. Verilator 5 with timing support:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/charm_pkg.sv tb/tb_charm_top.sv --top-module tb_charm_top -o sim
./obj_dir/sim
```

Replace `tb_charm_top` by any other testbench name. Lint one module with
`verilator --lint-only -Wall -Wno-fatal -y rtl rtl/charm_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are benign: package constants that a given
module does not use, unused upper configuration data bits, unconnected queue
level outputs, and the reset used both as an asynchronous reset and in
assertion `disable iff` clauses.

What the tests establish:

* `tb_charm_top` runs the whole chip at its default parameters through a
  broadcast transmission. The microcontroller loads RAM, programs the
  connections and enables power control. It writes a 64-byte packet through
  its queue session. The DLL is woken by its alarm on the exact tick, opens its
  baseband and queue sessions, reads the packet back intact across the queues'
  sleep, answers through the RX queue and re-arms its sampling alarm. Finally
  power control is switched off and on. It counts sleeps, wakes through
  connected ports, wakes by alarm, blocked wall crossings, refused PIF
  requests, retained data and the disable mode, and fails if any count is
  zero. It also checks the one-cycle activation and the supply voltage of
  every domain.
* `tb_power_manager` compares 4000 cycles of random PIF traffic and register
  writes, cycle by cycle, against an independent model of the policy. It then
  checks alarm ordering, same-tick alarms, cancellation and alarm latency.
* `tb_rx_sampling` keeps the DLL and baseband sampling the channel every
  100 ms (8000 timer ticks) for several periods. It checks that each wake-up
  lands on the exact tick and that the domains sleep in between.
* The block testbenches check each module against reference values computed
  in the testbench, at the full-size defaults. A few add a second instance with
  other parameters: `tb_time_wheel` a small one that wraps, `tb_power_switch`
  one with a different retention voltage. `tb_signal_wall` uses a 16-bit wall.

## Design choices beyond the source description

The published description gives the architecture and the policy but not the
encodings. These are this implementation's own choices and are the first
places to adapt when integrating real subsystems:

* four ports per domain, one connection per port, and the register map;
* the PIF message set, its encoding and the accept-immediately handshake;
* relative alarm delays, signed "due" comparison (105 s horizon), tie rule;
* an expiring alarm clears can_sleep (the wake-up is kept until the domain
  says it is done);
* the reset state (power control off, everything awake);
* the 80 kHz timer as a clock enable rather than a derived clock;
* a byte-FIFO organisation of the packet queues with no packet framing;
* the assignment of queue sides to queues ports 0 and 1, and walls on both
  directions of the queues domain.

Not modelled: the electrical behaviour of the switches (sizing, leakage,
buffer-tree delay, 30 um placement stride), the oscillator and the retention
voltage converter, and everything inside the protocol subsystems. The one
figure in the description that this RTL does not account for is the total
memory: 68 kB, against 66 kB built here (64 kB RAM and two 1 kB queues). The
remainder presumably sits in subsystems that are not included, such as the
microcontroller's 256-byte register file.
