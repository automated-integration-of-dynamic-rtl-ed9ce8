# Dynamic power management for a small FPGA system

A small FPGA with a single core voltage leaves two ways to save dynamic power
at run time: clock gating, which stops the clock of a part that has nothing to
do, and frequency scaling, which runs a part only as fast as it must. This RTL
shows both in a small system. It holds an 8-bit processor, a UART and a
power-management unit (PMU). Each part sits in a clock domain of its own. The
PMU makes every domain clock from one master clock. The processor can change
any domain's frequency, its own included, by writing one byte.

The system comes from a case study of automatically generated power
management on a Lattice iCE40 (iCEstick) board. There, the PMU and the
synchronizers were the generated parts, and the processor was an existing
open-source core. The generator software itself is not hardware and is not
part of this RTL.

## System structure

```
                 48 MHz master clock (PLL output)
                          |
   power_mode[1:0] ---> +-----+ --clock_pd1--> UART domain
                        | PMU | --clock_pd2--> processor domain (cpu_clk)
      cs, set_freq ---> +-----+ --clock_pd3--> (no load, brought out)
           ^
           |  sync_pmu (synchronizer_bus, processor -> master clock)
           |
   processor ports --- sync_tx (synchronizer_bus, processor -> UART) ---> UART transmit/tx_byte
   (cpu_data_out,  <-- sync_rx (synchronizer, UART -> processor) <------- UART received
    cpu_tx_valid,  <-- cpu_data_in taken directly from UART rx_byte
    cpu_pmu_changer)
                                                                UART <--> uart_rxd / uart_txd
```

| Module | File | Role |
|---|---|---|
| `dpm_system` | `rtl/dpm_system.sv` | Top. Wires the PMU, the UART and three synchronizers. The processor connects through ports. |
| `pmu` | `rtl/pmu.sv` | Makes the three domain clocks from the master clock and takes the frequency commands. |
| `synchronizer` | `rtl/synchronizer.sv` | Carries a one-cycle event between two clock domains. |
| `synchronizer_bus` | `rtl/synchronizer_bus.sv` | Carries an 8-bit word and its strobe between two clock domains. |
| `uart` | `rtl/uart.sv` | 8N1 serial transmitter and receiver. |
| `dpm_pkg` | `rtl/dpm_pkg.sv` | Level codes, the command-word struct and a helper that builds a command word. |

The processor, its memory and the PLL are not in this RTL. The processor is
an existing core. The PLL is a vendor primitive that makes 48 MHz from the
board's 12 MHz oscillator. The master clock therefore enters `dpm_system` as
the `clock` port. The processor's clock and signals are ports of the top
(`cpu_*`). A behavioural processor in `tb/cpu_model.sv` drives them in
simulation.

## How the PMU makes the domain clocks

This is the least obvious part of the design, and the part most worth
understanding before you take it to hardware.

All domain clocks are gated copies of the one master clock. No separate
clocks are generated and then multiplexed. The PMU has a free-running divider
for each non-zero frequency level. Each divider gives a one-master-cycle
`tick` every `CLOCK_HZ / LEVEL_HZ` cycles:

| Level code | Frequency | Master cycles per domain pulse |
|---|---|---|
| 0 | stopped (clock gated) | - |
| 1 | 1.2 kHz | 40000 |
| 2 | 12 MHz (reset level) | 4 |
| 3 | 48 MHz | 1 |

Each domain picks the tick of its current level. The PMU retimes that
selection on the falling edge of the master clock (`en_q`) and ANDs it with
the master clock. A negative-edge flop followed by an AND behaves like a
latch-based clock-gating cell. The enable changes only while the master clock
is low, so the AND cannot produce a glitch or a shortened pulse. Every domain
clock edge lines up with a master clock edge.

What this means for a user:

* **Duty cycle.** A domain clock is a train of master-clock high phases.
  Each pulse is about 10.4 ns wide, whatever the level. At 12 MHz the clock is
  high for a quarter of its period, and at 1.2 kHz for a very small fraction.
  Logic in a domain must meet timing from one rising edge to the next, which
  is a full period. Only the high phase is short, so logic that uses both
  clock edges will not work in a slowed domain.
* **Level changes.** A new level takes effect at that level's next tick.
  The first pulse at the new rate therefore comes within one period of the new
  rate, with no runt pulse in between.
* **Phase.** Domains at the same level share a divider, so their pulses are
  in phase. A 12 MHz domain and a 48 MHz domain pulse together on every
  fourth master cycle.
* **On an FPGA** the AND should map onto the device's global-buffer enable or
  a dedicated clock-gating resource, not onto general logic.

## Commanding the PMU

The PMU takes commands in its own master-clock domain.

* **`cs` + `set_freq`.** A one-cycle `cs` applies `set_freq`. Bits [7:4]
  name the domain: 1, 2 and 3 select `clock_pd1`, `clock_pd2` and
  `clock_pd3`. Bits [3:0] give the level code from the table above. A command
  that names another domain or level code is ignored. `dpm_pkg::pmu_cmd()`
  builds a command word.
* **`power_mode`.** This input goes through a two-flop synchronizer. Each
  time its value changes, all three domains load their levels from row
  `power_mode` of the `MODE_LEVELS` parameter. If a `cs` command arrives in
  the same cycle, the command wins for its own domain. The default table is:

| Mode | pd1 | pd2 | pd3 |
|---|---|---|---|
| 0 | 12 MHz | 12 MHz | 12 MHz |
| 1 | 12 MHz | stopped | stopped |
| 2 | 48 MHz | 48 MHz | 48 MHz |
| 3 | stopped | stopped | stopped |

A mode is applied only when the input changes. To apply the same mode again,
for example after commands have moved single domains, switch to another mode
and back. After reset every domain runs at 12 MHz, which matches mode 0.

In the system, the processor sends commands through `sync_pmu`. It puts the
command on `cpu_data_out` and pulses `cpu_pmu_changer`. The word crosses into
the master-clock domain and arrives as `set_freq` together with a one-cycle
`cs`.

**A domain that stops its own clock cannot restart it.** If the processor
sets `clock_pd2` to level 0, it stops running. Only a `power_mode` change
or a reset brings it back. The end-to-end testbench shows this: it stops the
processor by command and revives it with mode 2.

## Crossing between domains

Both synchronizers use the same toggle handshake.

1. An accepted strobe in domain A flips a request flag. `synchronizer_bus`
   also captures `bus_in` into a holding register at the same time.
2. The flag goes through `STAGES` (default 2) flip-flops into domain B. On
   the next B edge, a change of the flag gives a one-cycle `clk_b_out`.
   `synchronizer_bus` loads the held word into `bus_out` in that same cycle.
3. The value that B has acted on returns through `STAGES` flip-flops to
   domain A. `busy` is high from the strobe until this acknowledge arrives.

Latency from the request flip to `clk_b_out` is `STAGES + 1` B-clock edges.
`bus_out` keeps the word until the next transfer. The holding register does
not change while the transfer is in flight, so domain B samples a stable
word.

A strobe that arrives while `busy` is high is dropped, and a simulation
assertion reports it. Callers should wait for `busy` to fall. The top brings
the busy outputs of the two processor-side synchronizers out as
`cpu_tx_busy` and `cpu_pmu_busy` for this.

A transfer needs both clocks. If domain B is stopped, `busy` stays high
until B runs again.

Received bytes cross in a different way. Only the UART's `received` event
passes through `sync_rx`, and it arrives as a pulse on `cpu_rx_full`. The
byte itself (`cpu_data_in`) comes straight from the UART's `rx_byte`
register. That register keeps its value for at least a character time after
the event, so the processor reads a settled value when it acts on the pulse.
This holds as long as the processor domain runs fast enough to see the event
before the next byte ends. At 1.2 kHz it does not, so only single keys get
through at that level.

## UART

`rtl/uart.sv` is a plain 8N1 UART: eight data bits, no parity, one stop bit.

* **Transmitter.** `transmit` starts a frame while the transmitter is idle.
  `tx_busy` covers exactly 10 bit times.
* **Receiver.** `rxd` passes a two-flop synchronizer, and each bit is
  sampled in its middle. `received` pulses once per frame with a valid stop
  bit. A frame with a low stop bit is dropped.

The bit time is `CLKS_PER_BIT` cycles of the UART domain clock. The default
of 104 gives 115200 baud at 12 MHz. The baud rate therefore scales with the
level that the PMU gives `clock_pd1`. At 48 MHz the UART runs four times
faster, so keep the UART domain at 12 MHz when the serial line's rate
matters.

## Own choices and departures

The following are taken from the case study:

* the block set and the port names of the PMU, UART and synchronizers;
* the three PMU domains;
* the command word, with the domain in the upper nibble and the level in the
  lower nibble, and its set strobe;
* the four frequencies: stopped, 1.2 kHz, 12 MHz and 48 MHz;
* the split into a UART domain and a processor domain, with the processor on
  `clock_pd2`;
* synchronizers on every crossing, plus one more from the processor to the
  PMU.

The following are this design's own choices:

* making every frequency by gating a single 48 MHz clock, and the pulse-train
  duty cycle that results;
* the numbering of levels and domains;
* what `power_mode` does and the contents of the mode table;
* reset to 12 MHz, with one asynchronous active-low reset for every block;
* the toggle handshake, the meaning of `busy` and the two-stage depth;
* which crossing uses which kind of synchronizer, and passing `rx_byte`
  without a synchronizer;
* the UART frame format and baud rate, and its `tx_busy`, `rxd` and `txd`
  ports;
* which signals the top brings out: `clock_pd3`, `level_pd`, the busy flags
  and the serial pins.

The case study measured board current at each frequency. The static current
dominated, and there was a small rise with frequency. Current cannot be
reproduced in RTL. The generator could also produce isolation cells for
designs whose domains can lose their supply. On a single-voltage FPGA no
domain is switched off, so none are included.

## Verification

Every testbench checks itself and ends with a
`TB_RESULT checks=N failures=M` line. Each one also has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb/synchronizer_tb.sv` | One pulse per event, latency, `busy` cover and release, and events dropped while busy. Run at three clock ratios. |
| `tb/synchronizer_bus_tb.sv` | The same, with random words. The word arrives unchanged together with its strobe, `bus_out` holds it, and the source may change right after the strobe. |
| `tb/uart_tb.sv` | The bench decodes `txd` independently (bit values, start and stop bits, frame length) and drives `rxd` with an encoder at nominal and 3 % slow bit times. It also covers a framing error and a loopback. |
| `tb/pmu_tb.sv` | Pulse counts for each domain at every level, the exact 1.2 kHz period, ignored commands, all four modes, a command after a mode, and reset. Every domain-clock edge must line up with a master clock edge. |
| `tb/dpm_system_tb.sv` | The whole system at its default sizes, with `tb/cpu_model.sv` as the processor. Described below. |

`tb/dpm_system_tb.sv` plays the terminal on the serial line. The processor
prints `HELLO\r\n` over the UART. The bench types keys `3`, `x`, `1`, `2`
and `0`, which move the processor domain to 48 MHz, change nothing, and then
move it to 1.2 kHz, 12 MHz and stopped. Power modes 2, 1 and 0 then follow.
The bench checks:

* that the text arrives intact;
* that the spacing between characters is the processor's delay loop. The
  spacing shrinks four times at 48 MHz.
* the processor clock period at each level;
* that the third domain is gated in mode 1.

The bench counts each of these mechanisms, and a mechanism that never
happened is a failure.

Each testbench runs in well under a second. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/dpm_pkg.sv tb/dpm_system_tb.sv --top-module dpm_system_tb
./obj_dir/Vdpm_system_tb
```

Replace `dpm_system_tb` with any other testbench name. The synchronizers
report a dropped strobe with a warning. The unit testbenches provoke this on
purpose.

## Changing it

* **Frequencies.** `pmu` takes `CLOCK_HZ` and `LEVEL_HZ[4]`. Each non-zero
  level must divide `CLOCK_HZ` exactly, and an elaboration assertion checks
  this. Level 0 is always "stopped". The level table in `dpm_pkg` names the
  codes.
* **Modes and reset level.** Set `MODE_LEVELS` (indexed `[mode][domain]`,
  domain 0 = `clock_pd1`) and `RESET_LEVEL`.
* **Synchronizer depth.** Set `STAGES`, minimum 2, on either synchronizer.
* **Baud rate.** Set `uart.CLKS_PER_BIT`. It counts cycles of the UART
  domain clock.
* **Number of domains.** This is fixed at three by the `clock_pd1..3` ports.
  To add domains, widen `NUM_DOMAINS` in `dpm_pkg` and add output ports.
