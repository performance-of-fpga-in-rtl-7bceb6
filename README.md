# Configurable windowed watchdog timer

An external watchdog for a processor that runs its software in fixed frames.
An ordinary watchdog only catches software that is too *slow*: a program
stuck in a loop that still kicks the timer is never caught. This watchdog
also catches software that is too *fast*. It only accepts a service inside a
short **service window** that opens at the start of each frame, and it
requires the next service before a longer **frame window** runs out. It has
its own clock (SYSCLK), so it keeps working if the processor's clock fails.
All window lengths are exact to one SYSCLK cycle.

When it detects a fault it raises `WDFAIL` and logs the kind of fault in a
status register. After a fixed delay, during which the software can save
debug data, it raises `RSTOUT` to reset the processor.

The RTL is plain synthesizable SystemVerilog with one clock domain. It was
written for an FPGA, and every size is a parameter.

## How the processor uses it

```
 INIT      ‾‾‾‾|_|‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾|_|‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
 service   ______|‾‾‾‾‾‾‾|______________________|‾‾‾‾|_________
 window              ^ service closes it           ^
 frame     __________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\/‾‾‾‾‾‾‾‾‾
 window              (re)started by each correct service
 WDSRVC    ____________|‾|________________________|‾|__________
```

1. **After power-up the watchdog has failed.** `WDFAIL` = 1. `RSTOUT` stays
   low, because the reset counter stays off until the first initialisation.
2. **Choose the window lengths.** Write FWLEN and SWLEN in the first write to
   the configuration register. That first write locks both fields.
3. **Initialise.** Write WDRST = 0 and then WDRST = 1: the rising edge arms
   the watchdog. At the next frame start, pulse the `INIT` pin low. The
   service window opens. (`INIT` may change at any time, since it is
   synchronised to SYSCLK, but a low pulse must last longer than one SYSCLK
   period.) Set WDSRVC to 1 while the window is open: `WDFAIL`
   falls and the frame window starts.
4. **Every frame:** pulse `INIT` low. Then, while the window is open, write
   WDSRVC = 1. Write WDSRVC back to 0 **before the next window opens**. Poll
   SWSTAT[0] to see whether the window is open.

The frame window must be longer than the processor's frame period. The next
service window then opens before the frame window runs out.

## Failure detection

The core is a four-state machine (`wdt_fault_fsm`). Only the last state is
"healthy":

| state | WDFAIL | leaves on |
|---|---|---|
| STATE0 failed | 1 | rising edge of WDRST → STATE1 |
| STATE1 armed | 1 | service window opens → STATE2; WDSRVC rises first → STATE0 |
| STATE2 window | 1 | WDSRVC rises → STATE3; window closes unserviced, or WDSRVC falls inside it → STATE0 |
| STATE3 running | 0 | any failure below → STATE0 |

A failed initialisation (STATE1 or STATE2 back to STATE0) just discards the
attempt. WDFAIL never fell, so nothing is logged and no reset is issued. In
STATE3, each of these is a failure, logged in FLSTAT:

| FLSTAT | failure | what the software did |
|---|---|---|
| 1 | frame window expired | serviced too late, or not at all |
| 2 | WDSRVC rose outside the service window | serviced too early. Two services in a row also land here: the first closes the window, so the second is outside it |
| 3 | WDSRVC fell inside the service window | left WDSRVC high from the last service until the next window opened |

A service window that closes without a service does not fail at once. It sets
the *missed* flag (SWSTAT[1]). From then on, services are still accepted but
no longer restart the frame window. The frame window therefore runs out, and
the failure is logged as code 1. The flag clears at the next WDRST rising
edge.

On a failure both windows stop, `WDFAIL` rises, and the reset counter starts.
FLSTAT keeps the last failure until the next one, or until SYSRESET. The
software can read it after re-initialising.

## Exact windows from a slow clock

This is the least obvious part of the design. Each window counts in periods
of a slow derived clock: SWCLK for the service window, FWCLK for the frame
window. The slow clock keeps the counters and their comparators small. The
problem is that `INIT` can fall at any point inside a slow-clock period, so
counting whole periods alone would leave an error of up to one period.
`wdt_window_timer` removes that error with three counters in sequence:

```
start                                                        end
  |<- T_off ->|<------ (LEN-1) slow periods ------>|<- DIV-T_off ->|
  offset up    main counter (counts slow-clock      offset down
  (SYSCLK)     rising edges)                        (SYSCLK)
```

1. The offset up counter counts SYSCLK cycles from the start to the next
   rising edge of the slow clock. It saves the count as `T_off`.
2. The main counter (16 bits) then counts LEN−1 slow-clock rising edges.
3. The offset down counter is loaded with `DIV − T_off` and counts it away.

The window is therefore open for exactly `LEN × DIV` SYSCLK cycles, at any
start phase. The testbenches check this for every phase. The service window
starts 3 SYSCLK cycles after `INIT` falls: two synchroniser flip-flops, then
the edge detector. A correct service closes it in the next cycle. The frame
window starts in the cycle after the service is written.

SWCLK and FWCLK come from `wdt_clkdiv`. They are produced as square waves,
but the logic uses a one-cycle strobe at each rising edge as a clock enable.
The whole design therefore runs on SYSCLK alone, with no extra clock nets.

## Register interface

The bus is synchronous to SYSCLK. `enable` is the chip select, `rd_wr` = 1
reads and 0 writes, and a write takes effect at the clock edge. The 16-bit
data bus is split into `dbus_i`, `dbus_o` and `dbus_oe`; connect it to a
tristate pad driver.

**Address 0: configuration/status register**

| bits | field | access | meaning |
|---|---|---|---|
| 1:0 | FWLEN | RW, lockable | frame window length select |
| 3:2 | SWLEN | RW, lockable | service window length select |
| 4 | WDRST | RW | rising edge arms the watchdog |
| 5 | WDSRVC | RW | rising edge services, falling edge must be outside windows |
| 6 | SWSTAT.open | RO | service window open |
| 7 | SWSTAT.missed | RO | a service window closed unserviced |
| 8 | WDFAIL | RO | copy of the WDFAIL output |
| 10:9 | FLSTAT | RO | last failure: 0 none, 1 frame expiry, 2 service outside window, 3 WDSRVC fell inside window |
| 11 | INIT | RO | synchronised INIT pin |

**Address 1: unlock register.** SWLEN and FWLEN can be written after
power-up until the first configuration write. After that they are locked. To
change them, write `0xAAAA` and then, at most 10 µs later, `0x5555`. For the
next 10 µs the length fields accept writes; then they lock again. A wrong
value, or a second pattern that comes too late, leaves them locked. Reading
address 1 returns the state of this sequence: 0 before the first
configuration write, 1 locked, 2 first pattern seen, 3 unlocked.

The length selects index hard-coded tables (`SW_LEN_TAB`, `FW_LEN_TAB`),
counted in SWCLK and FWCLK periods.

## Reset output

`wdt_reset_counter` loads a down counter when `WDFAIL` rises. `RSTOUT` rises
exactly `RST_DELAY` cycles later and stays high for `RST_PULSE` cycles. The
counter is off after power-up. It turns itself on the first time `WDFAIL`
falls, so the failed state the watchdog starts in never resets the
processor. If the software re-initialises the watchdog before the delay
ends, no reset is issued.

## Parameters (`wdt_top`)

| parameter | default | meaning |
|---|---|---|
| `SW_DIV` | 1000 | SYSCLK cycles per SWCLK period (20 µs at 50 MHz) |
| `FW_DIV` | 50000 | SYSCLK cycles per FWCLK period (1 ms at 50 MHz) |
| `SW_LEN_TAB` | 10, 25, 50, 100 | service window lengths for SWLEN = 0..3, in SWCLK periods |
| `FW_LEN_TAB` | 15, 20, 50, 100 | frame window lengths for FWLEN = 0..3, in FWCLK periods |
| `UNLOCK_CYCLES` | 500 | 10 µs unlock timing, in SYSCLK cycles |
| `RST_DELAY` | 50000 | WDFAIL to RSTOUT, in SYSCLK cycles (1 ms) |
| `RST_PULSE` | 50 | RSTOUT width, in SYSCLK cycles (1 µs) |

The 10 µs unlock timing, the 16-bit unlock register and its two patterns,
the 16-bit main counters, and the lengths 10 (service) and 15 (frame) come
from the design this implementation follows. All the other numbers are this
implementation's own, chosen for a 50 MHz SYSCLK. With the defaults, the
shortest service window is 200 µs and the shortest frame window is 15 ms.
Tables are packed arrays with entry 0 in the lowest bits, for example
`{16'd100, 16'd50, 16'd25, 16'd10}`.

## Files

| file | block |
|---|---|
| `rtl/wdt_pkg.sv` | shared types: register bit map, FSM states, failure codes, default tables |
| `rtl/wdt_top.sv` | top level, wires the blocks below |
| `rtl/wdt_regs.sv` | bus interface and configuration register |
| `rtl/wdt_unlock.sv` | pattern comparator and length lock |
| `rtl/wdt_clkdiv.sv` | SWCLK / FWCLK divider |
| `rtl/wdt_window_timer.sv` | three-counter exact window timer (shared) |
| `rtl/wdt_service_window.sv` | INIT synchroniser and edge detector, plus the service window |
| `rtl/wdt_frame_window.sv` | frame window |
| `rtl/wdt_fault_fsm.sv` | initialisation and fault detection state machine |
| `rtl/wdt_reset_counter.sv` | RSTOUT delay counter |
| `rtl/wdt_sync.sv` | two-flop synchroniser |

## Verification

Each block has a self-checking testbench, `tb/tb_<module>.sv`. Each one
compares the block with values worked out in the testbench, and exact cycle
counts are checked wherever the design promises them. Two testbenches run
the whole watchdog, driven by a processor model (`tb/wdt_cpu_model.sv`):

* `tb_wdt_top` uses short clocks (`SW_DIV` = 8, `FW_DIV` = 16). It makes
  every mechanism happen and counts them: discarded initialisations,
  correct frames, each of the three failure modes plus the double service,
  RSTOUT pulses, locked-length writes, a late unlock attempt, a successful
  unlock, and SYSRESET during operation.
* `tb_wdt_top_full` uses all defaults. It runs a 10 000-cycle service
  window, three 300 000-cycle frames, a missed service with the frame expiry
  750 003 cycles after the last service, RSTOUT 50 000 cycles later, a
  service outside the window, WDSRVC left high into the next window, and an
  unlock with the second pattern exactly 500 cycles after the first. It
  simulates about 2.4 million cycles in under two seconds.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/wdt_pkg.sv tb/tb_wdt_top.sv --top-module tb_wdt_top -o sim
./obj_dir/sim
```

Each testbench prints `TB_RESULT checks=N failures=M`.

With the default parameters, generic synthesis gives about 200 flip-flops.
That fits easily in the smallest Spartan-6 (4800 registers). It is more
than a minimal implementation would need, because the offset counters and
the reset counter are sized for the 50 MHz defaults.

## Departures and open points

* **Clocking.** SWCLK and FWCLK are clock enables, not separate clocks. The
  timing is the same; only the number of global clock nets differs.
* **Bus.** The bus is assumed synchronous to SYSCLK, with single-cycle
  writes. A processor on another clock needs a synchroniser or a handshake
  in front of `wdt_regs`. Only `INIT` is synchronised here.
* **Register layout.** The bit positions, the address map, the 2-bit length
  selects and the FLSTAT codes are this implementation's choices.
* **RSTOUT.** It is a pulse of `RST_PULSE` cycles, not a level held high.
  This lets a processor held in reset by it restart and re-initialise the
  watchdog.
* **Choices for undefined cases.** These behaviours are not fixed by the
  design, so this implementation chose:
  * An `INIT` falling edge while the service window is open is ignored.
  * A frame expiry in the same cycle as a service counts as a failure.
  * A WDRST edge while the watchdog is running has no effect.
  * The missed flag stops later services from restarting the frame window.
