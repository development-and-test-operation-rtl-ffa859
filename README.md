# Beam interlock logic for an accelerator machine-protection system

An accelerator that delivers an intense heavy-ion beam must stop that beam
within about a millisecond when any magnet supply, vacuum valve, cavity or
beam-loss monitor reports trouble. This RTL is the fast part of such a
machine-protection interlock, modelled on the successor interlock system of
the RIKEN RI Beam Factory. The split is the system's central idea:

* the **decision** "beam off or not" is made in FPGA logic, from hard-wired
  digital signals, in a few clocks;
* the **settings** that shape that decision (which inputs count, for how
  long, which stopper protects which part of the machine, the analog limits)
  are loaded and monitored by a slow supervisory processor over a register
  bus, and never sit in the fast path.

The system has three kinds of stations, each a module here:

| Station | Module | What it decides |
|---|---|---|
| DI Station (up to 9) | `bis2_blu` (BIS Logic Unit) | which zones of the beam line have an active, unmasked alert |
| AI Station (up to 7) | `bis2_ai_station` | which analog channels are past a warning or a beam-stop limit |
| Chopper station (1) | `bis2_bcu` (BIS Chopper Unit) | which beam choppers must be excited now |

`bis2_top` wires them together.

## How a beam stop happens

```
 equipment alerts ──► DI Station (BLU) ──zone lines (hard wires)──► Chopper station (BCU) ──► beam choppers
                          ▲                    │                          ▲
 analog signals ──► AI Station ──stop lines────┘ (into DI inputs)         │
                                               └──► stopper insert cmds   stopper "inserted" status
```

1. An alert input of a DI Station goes high. After a two-flop synchronizer it
   is dropped if its **mask** bit is set; otherwise it raises its **zone**
   request. The zone request also stays up for the input's **holding time**
   after the alert goes away.
2. Each DI Station has `N_REQ` zone lines. They leave the station as hard
   wires to the chopper station, and they double as the insertion commands
   for each zone's beam stopper (a Faraday cup that can be driven into the
   beam line).
3. The chopper unit excites the chopper assigned to a zone line as long as
   the line is active and no stopper upstream of that zone is inserted.

Analog alarms take the same route. An AI Station turns a beam-stop limit
violation into a DO line that is wired into an input of a DI Station. The
fast digital path therefore handles every beam stop.

## Zones, stoppers and chopper release

This is the least obvious part of the logic. The chopper deflects the beam
right after the ion source, so it stops the whole machine at once. Stopping
everything is fast, but it wastes the recovery time. The interlock therefore
also inserts the beam stopper just upstream of the faulty component. When
that stopper reports "inserted", the fault lies behind a closed door. The
chopper is then released, and operators can tune the beam up to the stopper
while the component is repaired. The zone request, which is also the stopper
command, stays active for as long as the fault lasts. The stopper is
withdrawn only when the fault has cleared.

In the chopper unit every request line `j` (line = `station*N_REQ + zone`)
has three settings:

* a **stopper set** `fc_set[j]`, the stoppers whose insertion protects that
  zone. The chopper is released as soon as any one of them is in. An empty
  set means no stopper can release the line.
* a **chopper index**. It selects which of the `N_CHOP` choppers serves the
  line.
* an **enable** bit. It takes a line out of service.

```
chop_out[c] = OR over lines j of  en[j] & req[j] & (chop_sel[j]==c) & ((fc_set[j] & fc_in) == 0)
```

On some beam lines the beam can run in either direction, depending on the
operation mode. "Upstream" then depends on the mode, and so does the choice
of chopper. The supervisory side handles a mode change by rewriting the
stopper sets and chopper indices. The logic has no built-in notion of modes.

## Masks and holding times (DI Station)

Per input `i`:

* `mask[i]` = 1 ignores the input.
* `zone[i]` picks the zone line that the input drives.
* `hold[i]` is the holding time in ticks. The tick is 1 ms with the default
  `TICK_DIV = 40000` at 40 MHz. With `hold = H > 0`, a request stays up for
  more than H and at most H+1 ticks after the alert clears. Tick phase is
  free-running. With `H = 0` the request follows the alert.

After reset every input is unmasked, in zone 0, with no hold. A station that
has not been configured yet therefore stops the beam on any alert. In the
same spirit, after reset the chopper unit has every line enabled on chopper 0
with an empty stopper set.

## Analog limits (AI Station)

A scanning converter delivers one `(channel, value)` sample per
`smp_valid` strobe. Each channel has four signed 16-bit limits in on-chip
memories:

| Condition | Result |
|---|---|
| value > upper-upper, or value < lower-lower | beam-stop flag → DO line, warning |
| value > upper, or value < lower | warning only (`warn_out`, for an audible alarm) |

The upper pair and the lower pair can be enabled separately. A beam-loss
channel uses only the upper pair. The flags track the latest sample of each
channel, so they are not latched. Each channel is assigned to one of `N_DO`
output lines. Checks are off after reset until limits have been loaded.
Samples may arrive every clock. Each one passes through a three-stage
pipeline: limit read, compare, output register.

## Timing

All latencies are in clocks of the station clock, 40 MHz assumed.

| Path | Clocks |
|---|---|
| DI input → zone line (`bis2_blu`) | 3 (2 sync + 1) |
| zone line / stopper status → `chop_out` (`bis2_bcu`) | 3 (2 sync + 1) |
| DI input → `chop_out` through `bis2_top` | 6 (150 ns) |
| AI sample → AI DO line | 3 |
| AI sample → `chop_out` | 9, plus the converter's scan time |

With a 64-channel converter scan at 250 kS/s aggregate, the analog path
responds within one scan (256 µs) plus 9 clocks. Where in the scan the step
arrives decides the exact figure.

The 1 ms response target of the system is set by I/O modules, cable runs of
up to about 135 m, and the converter scan. The logic adds well under a
microsecond. Every station-to-station wire is resynchronized at its receiver.
The stations in `bis2_top` share one clock, but separate clocks per station
would also work.

## Supervisory register bus

Each station has the same bus, `bis2_pkg::cfg_req_t`:

* `wr`: a one-clock write strobe.
* `addr`: a 16-bit word address.
* `wdata`: 32-bit write data.

Reads need no strobe. `cfg_rdata` shows the register at `addr` one clock
later. In `bis2_top`, `cfg_addr[23:16]` selects the station:

* 0: the chopper unit.
* 1 … `N_DI_ST`: the DI Stations.
* `N_DI_ST+1` …: the AI Stations.

| Station | Address | Contents |
|---|---|---|
| DI | `0x0000+i` | `[0]` mask, `[11:8]` zone, `[31:16]` hold (R/W) |
| DI | `0x1000+w` | synchronized inputs, 32 per word |
| DI | `0x2000+w` | per-input requests after mask and hold |
| DI | `0x3000` | zone lines |
| Chopper | `0x0000+j` | `[N_FC-1:0]` stopper set, `[18:16]` chopper, `[31]` enable (R/W) |
| Chopper | `0x1000+w` / `0x2000+w` / `0x3000` | request lines / stopper status / chopper outputs |
| AI | `0x0000+4ch+k` | limit k of channel ch, k = 0 HH, 1 H, 2 L, 3 LL (R/W) |
| AI | `0x1000+ch` | `[0]` upper on, `[1]` lower on, `[7:4]` DO line (R/W) |
| AI | `0x2000+ch` | latest value |
| AI | `0x3000+w` / `0x3080+w` / `0x3100` | stop flags / warning flags / DO lines |

## Sizes

| Parameter | Default | Origin |
|---|---|---|
| `N_DI_ST` DI Stations | 9 | planned system |
| `N_AI_ST` AI Stations | 7 | planned system |
| `N_DI` inputs per DI Station | 192 | planned system |
| `N_AI` channels per AI Station | 64 | planned system |
| `N_REQ` zones per DI Station | 8 | design choice |
| `N_FC` stoppers | 16 | design choice |
| `N_CHOP` choppers | 8 | design choice, one TTL module's lines |
| `N_AI_DO` stop lines per AI Station | 4 | design choice |
| `TICK_DIV` | 40000 | design choice, 1 ms at 40 MHz |

At these sizes the chopper station needs 72 request lines plus 16 stopper
inputs, which fits in the 160 digital inputs of its five 32-channel input
modules. AI Station `a` drives the last `N_AI_DO` inputs of DI Station `a`.
Those inputs therefore have no external connection, and the matching
`di_in` bits are ignored.

## What follows the source system and what does not

Taken from the source system:

* the three station types and their division of work;
* the per-input mask and holding time;
* the comparison of requests with stopper status;
* the four analog limits and the warning/stop split;
* analog stops routed through a DI Station;
* the station counts and the channel counts per station.

Chosen here, because the source system does not specify them:

* the holding time taken as a post-alert hold, in 1 ms ticks;
* zones as the unit that connects inputs, stoppers and choppers;
* per-line stopper sets and chopper selection;
* alert polarity (1 = alert) and no input debounce;
* strict comparisons and unlatched analog flags;
* the reset defaults;
* the register bus and its map;
* all widths;
* the single shared clock in `bis2_top`.

Not part of this RTL:

* the supervisory software: the real-time OS, the EPICS server, the GUI, the
  audible alarm and logging;
* the vendor chassis and I/O modules;
* the analog pull-up circuit at the digital inputs.

The source system also does not say whether alarms are latched until an
operator acknowledges them. Nothing is latched here: requests clear when the
alert and its holding time are over.

## Simulating

Concurrent assertions in the three station modules check that an output
line never rises without a cause in the previous clock. A zone line needs an
active input. A chopper needs an enabled request line. A stop line needs a
stop flag.

Each testbench checks itself and ends with a `TB_RESULT checks=N failures=M`
line. Example with plain Verilator (run from the directory that holds `rtl/`
and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/bis2_pkg.sv tb/tb_bis2_top.sv --top-module tb_bis2_top -o sim
./obj_dir/sim
```

| Testbench | Covers |
|---|---|
| `tb_bis2_blu` | latency, zones, masks, holding time, read-back, random masks and inputs against a model |
| `tb_bis2_bcu` | reset behaviour, latency, stopper release, disabled lines, random sweep against a model |
| `tb_bis2_ai_station` | latency, warning and stop bands on both sides, strictness, enables, random sample stream against a model |
| `tb_bis2_top` | reduced-size end-to-end run. It counts each mechanism (digital stop, mask, hold, stopper release, mode change, analog warning, analog upper-upper and lower-lower stops, read-back) and fails if any never happened |
| `tb_bis2_top_full` | one complete operation at the default sizes: digital stop and release, holding time in real 1 ms ticks, analog stop through a DI Station |
| `tb_bis2_response` | response time at the default sizes, five alerts per path. Digital: 6 clocks (150 ns). Analog: a step at a random point of a 250 kS/s converter scan (256 µs per 64 channels) must stop the beam within one scan plus 9 clocks. |

`tb/ni9205_scan_model.sv` is a behavioural stand-in for the scanning analog
input modules. It feeds the AI Station in the top-level tests.

## Files

* `rtl/bis2_pkg.sv`: bus type, register pages, limit slot enum.
* `rtl/bis2_sync.sv`: two-flop synchronizer.
* `rtl/bis2_tick.sv`: holding-time tick.
* `rtl/bis2_blu.sv`: DI Station logic.
* `rtl/bis2_bcu.sv`: chopper-station logic.
* `rtl/bis2_ai_station.sv`: AI Station logic.
* `rtl/bis2_top.sv`: the whole interlock.
