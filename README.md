# 100-site wireless biphasic neural stimulator

This is the digital core, plus fixed-point models of the per-site analog circuits, of a chip that drives a
10 x 10 array of stimulation electrodes, such as a Utah electrode array bonded to its back. A single
2.765 MHz inductive link powers the chip, clocks it and programs it. Once a site is programmed, it
keeps producing charge-balanced biphasic constant-current pulses on its own: a cathodic phase, a
current-free interphasic delay, then an anodic phase of the same amplitude and length. Each site has its
own amplitude, duration, interphasic delay and repetition period.

One idea shapes the whole design: **a single token circulates through the 100 sites, and only the
site holding it may stimulate.** No two electrodes ever drive current at the same time. This keeps
the chip's power, and so tissue heating, bounded, and prevents currents from adding up at a common
neural site. The cost is that pulses are serialised: a site can be made to wait for another
site's pulse to finish.

The architecture follows the published INIS (integrated neural interface stimulator) chip: one
global FSM, and per site a register bank, an internal FSM, a counter, a token cell, an R-2R DAC, a
x10 output stage and an active charge-recovery amplifier. The command frame format, the bus
handshake details, the repetition step and several corner cases are not published. They are this
design's own choices, listed in [Departures and choices](#departures-and-choices).

## Block diagram

```
 carrier (2.765 MHz) ──► clock_divider ──► sys_clk (1.38 MHz, 725 ns) ──► everything below
 ask_bit (20 kb/s) ──► command_receiver ──► global_fsm ══ shared write bus (wr_req, wr_cmd, wr_ack) ══╗
                                                                                                  ║
     ┌──────────── token ring: site 0 → 1 → … → 99 → 0 ─────────────────────────────────────┐     ║
     ▼                                                                                      │     ║
 stim_cell[k]:  token_cell ◄─► site_fsm ◄─► site_counter                                   │ ◄═══╝
                                  │   ▲                                                     │
                                  ▼   │                                                     │
                          site_register_bank ── amplitude ──► r2r_dac ─► output_stage ─┐    │
                                                                                       +──► i_electrode_na[k]
                                          v_electrode_mv[k] ─► charge_recovery ────────┘
```

| File | Role |
|---|---|
| `rtl/inis_pkg.sv` | widths, register-select enum, command and parameter structs, pulse phases |
| `rtl/inis_top.sv` | the chip: clock, command path, 100 sites in a ring |
| `rtl/clock_divider.sv` | carrier / 2 → system clock |
| `rtl/command_receiver.sv` | serial deframer for the demodulated ASK stream |
| `rtl/global_fsm.sv` | address check and request/acknowledge write to one site |
| `rtl/stim_cell.sv` | one site: the seven per-site blocks wired together |
| `rtl/site_register_bank.sv` | four registers plus the working copy used by a running pulse |
| `rtl/site_fsm.sv` | register-write handshake and the pulse sequencer |
| `rtl/site_counter.sv` | phase timer and repetition-interval timer |
| `rtl/token_cell.sv` | holds and forwards the token |
| `rtl/r2r_dac.sv`, `rtl/output_stage.sv`, `rtl/charge_recovery.sv` | fixed-point behavioural models of the analog circuits |

The rectifier, the 5 V series regulator, the bias generator, the carrier comparator, the ASK
envelope detector and the pads are analog and are not part of the RTL. Their signals are top-level
ports: `carrier` is the squared coil voltage, `ask_bit` is the sliced envelope, and the electrode
voltages and currents are ports.

## Time base and register encodings

Everything runs on the carrier divided by two: 2.765 MHz / 2 = 1.3825 MHz, one cycle = 723 ns,
called 725 ns below. All timing is counted in these cycles, so it is exact relative to the carrier.

| Register | Bits | Meaning | Range |
|---|---|---|---|
| amplitude | 8 | DAC code; 1 uA per step after the x10 output stage | 1–255 uA |
| duration | 9 | length of the cathodic phase and of the anodic phase, in cycles | 2–511 cycles = 1.45–370 us |
| interphasic delay | 9 | current-free gap between the phases, in cycles | 2–511 cycles = 1.45–370 us |
| repetition | 9 | bit 8 = site active; bits 7:0 = period P in steps of 8192 cycles | P = 1…255: 168.8 Hz … 0.662 Hz |

Phase values 0 and 1 are stretched to 2 cycles, the 1.45 us minimum. Period 0 behaves as 1.

The 8192-cycle step is derived, not published. Only a period resolution of "about 6 ms" and a
0.66–168 Hz range are given. 8192 cycles is 5.93 ms, and it reproduces both ends of the range
exactly (1 step → 168.8 Hz, 255 steps → 0.662 Hz).

## Programming a site

### Command frames

The line idles high. A frame is one low start bit, 18 payload bits sent MSB first, and one high
stop bit. One bit lasts `BIT_CYCLES` = 69 system cycles (1.3825 MHz / 20 kb/s):

```
 start | addr[6:0] | sel[1:0] | data[8:0] | stop
   0   |  site 0-99 | 0 amp, 1 dur, 2 ipd, 3 rep | value | 1
```

`command_receiver` synchronises `ask_bit` with two flip-flops. It finds the falling edge of the start
bit, checks the start bit again half a bit later, then samples every bit in its middle. A frame with a
low stop bit is dropped and flagged on `cmd_frame_err`. One frame plus two idle bits takes about
1.5k cycles (1.1 ms), so writing all four registers of a site takes about 4.4 ms.

### The write handshake

`global_fsm` drops commands for addresses 100–127 (`cmd_addr_err`). Otherwise it drives the command on
a bus shared by all 100 sites and raises `wr_req`. The addressed site's `site_fsm` stores the data
on the first request cycle and raises its acknowledge one cycle later. The FSM then withdraws the
request, and it takes no new command until the acknowledge has fallen again. This is the
four-phase handshake that makes sure a site has stored its data before another site is accessed.

A write takes 4 cycles, far shorter than a frame, so `cmd_overrun` (a command arriving while a write
is open) cannot happen with a well-formed stream. It is flagged anyway.

A register can be rewritten at any time, even while its site is producing a pulse. At the start of
each pulse, the site copies amplitude, duration and interphasic delay into a working copy. The
running pulse therefore finishes with its old values, and the new values apply from the next pulse.

## The token ring and the pulse sequence

This is the part of the design that decides when pulses actually occur.

After reset the token sits in site 0. Each cycle, the site holding the token checks two things. Is
the site active (repetition bit 8)? Is a pulse due, meaning at least P x 8192 cycles have passed
since the start of its previous pulse?

* **Not due:** the token moves to the next site one cycle after it arrived. With no site active, the
  token laps the 100 sites in exactly 100 cycles (72 us).
* **Due:** the site keeps the token and runs its sequence:

```
 cycle:      t        t+1 … t+D      t+D+1 … t+D+I    t+D+I+1 … t+2D+I    t+2D+I+1
 token:      arrives  held ─────────────────────────────────────────────►  at next site
 phase:      IDLE     CATHODIC (D)   INTERPHASE (I)   ANODIC (D)           IDLE
 current:    0        −A             0                +A                   0
```

The sequence takes D = duration and I = interphasic delay, in cycles. The token is handed on in the
last anodic cycle. If the next site is due, its cathodic phase starts one cycle after this site's
anodic phase ends, so pulses on different electrodes follow each other back to back without
overlapping.

Three properties follow from this:

* The start-to-start period of a site is never shorter than P x 8192 cycles. The interval prescaler
  restarts with every pulse, so there is no sharing-induced jitter that would let a site fire early.
* A site can fire later than its period. It waits at most one token lap plus the pulses of the sites
  in between. With every site active at the maximum pulse (511 + 511 + 511 cycles = 1.11 ms), a turn
  round the ring takes about 111 ms, so no electrode can exceed about 9 pulses/s. The token trades
  simultaneous stimulation for this bound.
* After reset the interval count of every site is saturated. A site that has just been armed
  therefore fires the next time the token reaches it.

The global reset (`rst_n`, asynchronous, active low) stops any pulse immediately, clears every
register (all sites inactive) and returns the token to site 0. The clock divider has no reset, so
the system clock keeps running during reset.

## Analog models

The analog parts are modelled in whole nanoamps and millivolts with plain integer arithmetic. The
whole design is therefore synthesizable and simulates with a two-state simulator. These models
describe behaviour only; they are not circuits.

* **`r2r_dac`**: the R-2R ladder halves the reference current at every branch, so
  `Iout = Iin · Σ s_i / 2^i`, with s_1 as the MSB. With `I_IN_NA` = 25 600 nA, the step is 100 nA and
  the full scale 25.5 uA. The output is zero when the DAC is disabled, which happens outside the two
  current phases.
* **`output_stage`**: multiplies the DAC current by `GAIN` = 10. It sources current (positive,
  anodic) or sinks it (negative, cathodic) as the site FSM selects. `ANODIC_ERR_PPM` can inject a
  source/sink mismatch; it is 0 by default and can also be set on `stim_cell` and `inis_top`.
* **`charge_recovery`**: always on, in every site. It drives `−v / 500 kΩ` into the electrode
  (2 nA per mV) and clips at ±235 nA, which bleeds off residual charge left by mismatch.
  `i_electrode_na` is the stimulation current plus this recovery current.

How far recovery reaches: at the harshest setting (255 uA, 370 us phases, period 1 = 168 Hz, 1.4 %
mismatch), each pulse leaves about 1.3 nC. Removing that in 5.93 ms takes 220 nA, just under the
235 nA limit. But the recovery amplifier also runs during the pulse. Then the electrode swings the
other way, and the amplifier pushes charge back on. On a 152 nF electrode (76 ms with 500 kΩ), the
residual before each pulse does not grow without bound. It levels off at about 0.4 V instead of
returning to zero (`tb_charge_recovery_workload`).

Not modelled: DAC nonlinearity, the compliance limit of the output stage (about ±2 V), and the
smooth transition of the recovery amplifier into its current limit.

## Departures and choices

The following are choices made where the published description is silent, or where this design
reads it a particular way:

* **Command format:** the frame layout, start/stop bits, MSB-first order, one register per command,
  and the rejection of addresses ≥ 100 are all this design's own.
* **Bus handshake:** the four-phase req/ack with a one-cycle acknowledge is this design's own; only
  the existence of a handshake is published.
* **Repetition step:** 8192 cycles (derived above). The prescaler is per site and restarts with
  each pulse. Period 0 behaves as 1.
* **Minimum phase:** duration and interphase values below 2 are raised to 2 cycles.
* **Phase order:** cathodic first, and the anodic phase uses the same duration register. A pulse
  therefore occupies 2·D + I cycles, which matches the published 9.1 pulses/s for 100 sites at
  370 us.
* **Working copy:** the rule "changes take effect at the next firing" is implemented by copying the
  registers at pulse start.
* **DAC step:** the design value of 100 nA is used (1 uA after x10). The measured 90 nA step comes
  from bias-current variation in silicon and is not modelled.
* **Status outputs:** `token_at`, `firing` and the `cmd_*` strobes are added so that the design can
  be observed from outside.

## Size

At the default parameters (100 sites), coarse synthesis gives about 12 600 word-level cells and
9 600 flip-flop bits. Almost all of this is in the 100 copies of `stim_cell`: about 80 register
bits each, plus the 13-bit prescaler, the 8-bit interval count and the 9-bit phase count.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M`
and ends with `$finish`. Each has a watchdog that counts a failure if the test hangs. With
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
          rtl/inis_pkg.sv tb/tb_inis_top.sv --top-module tb_inis_top -o sim
./obj_dir/sim
```

Replace `tb_inis_top` with any other testbench name.

| Testbench | What it checks |
|---|---|
| `tb_inis_top` | The whole chip at full size (100 sites, 69 cycles/bit, 8192-cycle step, 2.765 MHz carrier). Commands are sent as serial frames. Every electrode current is decoded into pulses and checked against a reference copy of the registers: amplitude, phase lengths, charge balance, minimum period, and never two electrodes at once. The test covers: idle token laps (exactly 100 cycles), a bad frame, a bad address, the two-electrode benchtop setting (75 uA / 370 us / 30 us at period 2; 150 uA / 200 us / 200 us at period 1), a pulse on the last site followed by the token wrapping to site 0, a site armed while another holds the token (it waits, then fires back to back), a write during a pulse, switching a site off, and reset in mid-pulse. Each of these must occur at least once. About 200k cycles; a few seconds. |
| `tb_inis_all_sites` | Worst-case load at full size: all 100 sites armed at period 1 with 511-cycle phases and full amplitude. Checks strict ring order, one electrode at a time, the pulse shape, and a start-to-start period of exactly 100 × 1534 = 153 400 cycles per site (about 9 pulses/s). About 1.1 M checks; roughly 10 s. |
| `tb_charge_recovery_workload` | One site on a 152 nF electrode model, with 1.4 % anodic mismatch at the harshest pulse setting for 400 pulses. Checks that the residual voltage converges and that the recovery current stays within ±235 nA. |
| `tb_stim_sweep` | One site at default parameters, swept as when finding a recruitment threshold: durations 14–511 cycles at full scale (code 255), then amplitudes 0–255 uA at 370 us. For every setting, the next pulse must have exact phase lengths, a flat current of code × 1 uA, and matching cathodic and anodic charge. |
| `tb_stim_cell` | One site in a one-site ring: bus writes, electrode current in every phase including recovery, period, reset |
| `tb_site_fsm` | Handshake, token passing, exact phase lengths, write during a pulse, minimum phases, switch-off |
| `tb_site_counter`, `tb_site_register_bank`, `tb_token_cell` | The per-site building blocks against reference models |
| `tb_command_receiver`, `tb_global_fsm` | Random frames and commands, error cases, strobe latency, write duration (4 cycles) |
| `tb_clock_divider`, `tb_r2r_dac`, `tb_output_stage`, `tb_charge_recovery` | Divide-by-two; the analog models against their formulas, over every code or a voltage sweep |

The design also carries assertions, active with `--assert`:

* the write bus stays stable, and the request stays up, until acknowledged;
* a token never arrives at a cell that still holds one;
* a site produces a pulse only while it holds the token;
* at most one site is in a pulse at any time.

The simulator is two-state. Every register that is read has a reset, except the clock divider,
whose starting phase does not matter.
