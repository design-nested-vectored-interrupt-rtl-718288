# Nested vectored interrupt controller with wake-up controller and power management

This is an interrupt subsystem for a 32-bit Cortex-M3 class core. It does two jobs.

- **Interrupt handling with low latency.** A nested vectored interrupt controller (NVIC) ranks the pending interrupts by priority. It saves the core's working registers to the stack in hardware and fetches the handler address from a vector table. Three mechanisms cut the cost of back-to-back and nested interrupts:
  - nesting (pre-emption);
  - late arrival, where a more urgent interrupt takes over an entry already in progress;
  - tail-chaining, where a second handler runs without restoring and re-saving the registers.
- **Deep sleep with the core powered down.** A small wake-up interrupt controller (WIC) stays powered while the core is off. It keeps watching the interrupt lines and wakes the core through a power management unit (PMU). The PMU sequences clock stop, isolation, state retention and power removal, and then reverses them on wake-up.

Everything is synthesizable SystemVerilog. Parameters default to 32 interrupt lines and 8-bit priorities (256 levels). The NVIC builds and runs at up to 240 lines. A non-maskable interrupt (NMI) input comes on top of the external lines.

## Block structure

```
              irq ──┬──────────────────────────────► WIC (always on) ──► WICPEND
                    │                                   ▲   │  WAKEUP
                    └──► OR ◄── WICPEND                 │   ▼
                          │ int_det                 clamps  PMU (always on)
                          ▼                             ▲   │ FCLK enable, ISOLATEn,
  FCLK ──► NVIC: nvic_regs ─► nvic_prio_resolver        │   │ RETAINn, PWRDOWN
                     │               │                  │   ▼
                     └──► nvic_exc_seq ◄─► nvic_sleep_ctrl ─┘
                            │  PPB port (stack)   vector port   core register port
```

| Module | Role |
|---|---|
| `cm3_nvic_system` | Top level. Contains the NVIC on the gated core clock FCLK, and the WIC and PMU on the always-on clock. The isolation clamps and the FCLK clock gate sit between them. |
| `nvic` | The interrupt controller. It wires together the four modules below. |
| `nvic_regs` | The control registers: enable, pending, active and priority state per interrupt, plus the sleep control bits. It also detects rising edges on the interrupt lines. |
| `nvic_prio_resolver` | Combinational logic. Picks the most urgent pending and enabled interrupt and decides whether it pre-empts the current execution priority. |
| `nvic_exc_seq` | The exception sequencer: stacking, vector fetch, late arrival, return, tail-chaining, sleep-on-exit and the nesting stack. |
| `nvic_sleep_ctrl` | Handles WFI, WFE and sleep-on-exit, and drives SLEEPING and SLEEPDEEP. It also answers the WIC and PMU handshakes from the core side. |
| `wic` | The wake-up interrupt controller: enable handshake, interrupt mask, latched pending vector, WAKEUP. |
| `pmu` | The power management unit: a state machine that sequences power-down and power-up. |
| `iso_clamp` | Forces the core-domain signals to 0 while the domain is isolated. |
| `clk_gate` | A latch-based clock gate for FCLK. |
| `nvic_pkg` | Shared constants, the state encodings and the register offsets. |

The processor core and the memories are not part of the RTL; their signals are brought out as ports. The testbenches use a behavioural model, `tb/core_mem_model.sv`, that stands in for the core's register file, a stack memory and a vector table.

## Priority

Each interrupt line `i` carries two pieces of priority information:
- a per-line bit `int_prior[i]`, supplied with the interrupt by its source;
- an 8-bit programmable priority `IPR[i]`.

The resolver forms the rank key `{~int_prior[i], IPR[i]}`, and a lower key is more urgent, as on ARM. A line with `int_prior=1` therefore outranks every line with `int_prior=0`, and IPR decides within each group. Equal keys go to the lower interrupt number.

The NMI has key 0. It therefore outranks every external interrupt, cannot be disabled, and cannot pre-empt itself. It has its own pending and active bits, set on a rising edge of `nmi`. Its vector is word 2 of the table, and `cur_nmi` is high while its handler runs.

The current execution priority is the smallest key among the active interrupts. A pending interrupt pre-empts only if its key is strictly smaller, so an interrupt of equal priority waits and is then tail-chained.

## Exception sequencer timing

This is the part that takes the most care. The sequencer is a single state machine, `RUN / PUSH / ENTER / RET_CHECK / POP / TAIL / SOE_SLEEP`, that drives three ports:

- **PPB port** (`padd psel pena pwrite pwdata prdata`): single-cycle transfers to the stack memory. `psel` and `pena` are high together and `prdata` is sampled in the same cycle.
- **Vector port** (`vec_req vec_addr vec_rdata`): reads the handler address at `VTOR + 4*(16+n)` for external interrupt `n`. This runs in parallel with the stacking, in the manner of a Harvard machine.
- **Core register port** (`reg_no core_write core_wdata core_rdata`): reads the register being saved, and writes back restored registers and the link register.

### Reset

After reset the sequencer reads vector word 0 and writes it to R13 as the stack pointer. The same value becomes its frame pointer. It then reads word 1 and gives it on `nvic_pc` with an `int_fetch` pulse, so the core starts at the reset handler. This takes two cycles, after which the sequencer is in RUN.

### Entry

The frame is six registers: R0, R1, R2, R3, R12, R13. Entry takes one cycle per register, then one ENTER cycle.

1. Resolver asserts pre-emption while the sequencer is in RUN.
2. PUSH ×6: the stack grows upward and frame word `k` goes to `fp + 4*(k+1)`. The vector is read in the first PUSH cycle.
3. ENTER: the interrupt is marked active and leaves pending. `int_fetch` pulses with the handler address on `nvic_pc`, and `EXC_RETURN = 0xFFFFFFF9` is written to R14.

At the NVIC boundary, `int_fetch` comes 8 cycles after the clock edge at which the interrupt line is first sampled high. That is one cycle to register the edge into the pending bit, then 6 pushes and ENTER.

**Late arrival.** If a more urgent interrupt becomes pending during PUSH, the sequencer switches its target and re-reads the vector. Stacking continues without restarting. The late interrupt's handler runs first and the original one stays pending.

### Return

The core signals the end of a handler by raising `nvic_irq_exe_end` (from its decoder) and `nvic_pop_det` (from its prefetch unit) together. The sequencer clears the handler's active bit and spends one cycle in RET_CHECK. It then takes one of three paths:

- **Tail-chain.** If a pending interrupt now outranks the stacked context, the frame stays where it is. The sequencer spends `TAIL_CYCLES` (6) cycles re-reading the vector, then ENTER. This saves the 6 pop and 6 push cycles.
- **Pop.** Otherwise the six registers are read back in the order they were pushed, R0 first, from rising addresses. `ret_done` marks the last one. If an interrupt becomes eligible during the pop, the pop is abandoned and the interrupt is tail-chained, because the frame is still intact on the stack.
- **Sleep-on-exit.** On a return to thread level with SCR.SLEEPONEXIT set, the frame is left stacked and the core goes to sleep. The next interrupt enters by a tail-chain.

Nesting depth is tracked in a small stack of interrupt numbers. It can never exceed NUM_IRQ + 1 (every external interrupt plus the NMI), because each nested handler must strictly outrank the one below it.

## Control registers

The register port is a simple single-cycle slave with byte strobes: `reg_sel reg_write reg_addr[11:0] reg_wdata reg_wstrb reg_priv`. Read data `reg_rdata` is combinational and `reg_fault` flags a refused access. Offsets are within the System Control Space and follow the ARMv7-M layout:

| Offset | Register | Behaviour |
|---|---|---|
| 0x004 | ICTR | read-only: number of 32-line register words minus 1 |
| 0x100+ | ISER | write 1 to enable; read enables |
| 0x180+ | ICER | write 1 to disable; read enables |
| 0x200+ | ISPR | write 1 to pend; read pending |
| 0x280+ | ICPR | write 1 to clear pending; read pending |
| 0x300+ | IABR | read-only active bits |
| 0x400+ | IPR | one priority byte per interrupt |
| 0xD10 | SCR | bit 1 SLEEPONEXIT, bit 2 SLEEPDEEP |
| 0xD14 | CCR | bit 1 USERSETMPEND |
| 0xF00 | STIR | write the interrupt number to pend it |

An interrupt becomes pending on a rising edge of its line, which means one-cycle pulses are enough. It can also be pended by ISPR or STIR. Hardware clears the pending bit when the interrupt is taken.

Unprivileged accesses (`reg_priv=0`) are refused with `reg_fault`. The one exception is a STIR write while USERSETMPEND is set.

## Sleep and wake-up

**Sleep instructions.** `wfi` and `wfe` are one-cycle strobes from the core.
- WFI always sleeps.
- WFE sleeps only if the event latch is clear. If the latch is set (by `rxev`), WFE clears it and execution continues.
- `sleeping` is high while asleep. `sleepdeep` is also high if SCR.SLEEPDEEP was set when the sleep began.
- An interrupt that would be taken ends the sleep. So does an event, for a WFE sleep.

**WIC mode.** The PMU raises WICENREQ. The WIC asks the core by pulling WICDSREQn low, the core agrees with WICDSACKn low, and the WIC answers the PMU with WICENACK. From then on every deep sleep is a WIC-mode sleep:

1. The core pulses WICLOAD with WICMASK carrying the enabled interrupts.
2. The core raises SLEEPDEEP.
3. The PMU pulls SLEEPHOLDREQn low, so the core cannot wake halfway through power-down, and waits for SLEEPHOLDACKn.
4. The PMU stops FCLK and isolates the core (ISOLATEn low).
5. It enables retention (RETAINn low).
6. It removes power (PWRDOWN high).

While the core is off, the WIC latches any masked-in interrupt into WICPEND and raises WAKEUP. The WIC watches the NMI as one extra line, the top bit of `wicpend` and `wicsense`. Its mask bit is tied to 1, so an NMI pulse always wakes the core, even with every external interrupt disabled. The PMU then reverses the sequence, one step per clock:

1. Power on.
2. Retention off.
3. Isolation off and FCLK running.
4. Hold released.

WICPEND, NMI bit included, is ORed into the NVIC's interrupt inputs, so the interrupt that caused the wake-up is pended and taken even if it was a single-cycle pulse long gone. On waking, the core pulses WICCLEAR to empty the WIC.

The system input `hold_sleep` keeps the PMU in the powered-down state while it is high, even if WAKEUP arrives. This is the way to extend a sleep.

While isolated, the core-domain outputs towards the WIC and PMU are clamped to 0: SLEEPDEEP, SLEEPHOLDACKn, WICDSACKn, WICLOAD, WICCLEAR and WICMASK.

In RTL, power is not actually removed. With FCLK stopped the NVIC simply keeps its state, which stands for the retention cells.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_IRQ` | 32 | external interrupt lines, 1 to 240 |
| `PRIO_W` | 8 | IPR priority bits (up to 8) |
| `TAIL_CYCLES` | 6 | cycles spent in a tail-chain |
| `VTOR` | 0 | vector table base address |

## Where this design departs from, or goes beyond, its source

- **Frame size.** The frame holds six registers (R0–R3, R12, R13), as the source's text and entry timing state. One of its flow charts instead lists the full ARMv7-M frame: R0–R3, R12, LR, PC, xPSR.
- **ARMv7-M conventions where the source gives no detail:** register addresses and bit layout, the vector table layout (external interrupt `n` at word 16+n), the EXC_RETURN value, and the rank order (lower value is more urgent).
- **int_prior combination.** How `int_prior` combines with IPR is this design's choice.
- **Bus protocol.** The single-cycle PPB protocol is this design's choice. The separate vector port and the core register port are also additions.
- **Handshake timing.** Handshake and PMU step timing is one clock per step, and the pulse widths are one cycle.
- **Sleep-on-exit.** Re-entry from sleep-on-exit by tail-chain follows ARMv7-M.
- **Clamps.** The set of clamped signals is read from a block diagram.
- **hold_sleep.** This input is an addition. It models a system request that extends the deep sleep.
- **System exceptions.** Of the 16 system exception numbers, only the NMI is built. Reset is limited to the SP and PC load; the fault exceptions, SVCall, PendSV and SysTick belong to the core and are not modelled.
- **Unused decoder signal.** A decoder signal `deco_pop_det` appears in the source's interface list, but its function is not described, so it is not implemented.

## Simulation

Each module has a self-checking testbench in `tb/`. Each one prints `TB_RESULT checks=<n> failures=<n>` and stops, with a watchdog against hangs.

| Testbench | Covers |
|---|---|
| `tb_nvic_regs` | register map, byte strobes, privilege faults, edge detection |
| `tb_nvic_prio_resolver` | random comparison against a reference model |
| `tb_nvic_exc_seq` | stacking addresses and order, latencies, late arrival, tail-chain, nesting, pop abort, sleep-on-exit |
| `tb_nvic_sleep_ctrl`, `tb_wic`, `tb_pmu`, `tb_iso_clamp` | the low-power blocks, with their handshakes cycle by cycle |
| `tb_nvic` | the NVIC with the core and memory model |
| `tb_nvic_240` | the NVIC at 240 lines |
| `tb_cm3_nvic_system` | the whole system end to end at default parameters |

`tb_cm3_nvic_system` counts every mechanism: entry, nesting, late arrival, tail-chain, pop, sleep, sleep-on-exit, WFE, faults, WIC load and clear, power-down, hold extension, an NMI waking the core from deep sleep, and sleep-on-exit into a deep sleep with the frame kept stacked through the power-down. It fails if any of them never happened.

To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/nvic_pkg.sv tb/tb_cm3_nvic_system.sv --top-module tb_cm3_nvic_system
./obj_dir/Vtb_cm3_nvic_system
```

The assertions in the RTL check handshake rules and fire during simulation:
- no PPB enable without select;
- the nesting depth bound;
- the core stays asleep while the sleep hold is acknowledged;
- power is only removed while the core is isolated.

The resolver is a linear scan. It is the longest combinational path and grows with NUM_IRQ; a tree comparator would suit wide configurations better.
