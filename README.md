# Low-power SoC platform for IoT nodes

This is the RTL of a small microcontroller-class SoC built around an ARM9
core. The CPU core itself is not included. The platform aims to run a
sensor node from a battery: it does a short burst of work, then spends most
of its life in one of three low-power modes. Around the CPU port you get:

- a 200 MHz system bus with 64 KB of main memory and a 16 KB SRAM buffer;
- AES and DES/triple-DES engines with their own DMA;
- a reset controller, an interrupt controller and a power management unit
  (PMU);
- a bridge to a 50 MHz peripheral bus carrying timers, a watchdog, UARTs,
  SPI, I2C, GPIO, a 12-bit SAR ADC, PWM and a NOR flash controller.

The design's hardest part is the interplay of clocks, resets and power
modes, so most of this document is about that.

## The big picture

```
             ext_clk ──┐
 xo_clk ── ADPLL ──────┴─ clk_gen ── sys_clk (200 MHz), peri_tick (1 in 4)
                                  │
 CPU port ──┐                     │
 sec DMA ───┴─ sys_bus ──┬─ main memory 64 KB     0x0000_0000
   (round-robin)         ├─ SRAM buffer 16 KB     0x1000_0000
                         ├─ security engines      0x2000_0000
                         ├─ reset controller      0x3000_0000
                         ├─ interrupt controller  0x3000_1000
                         ├─ PMU                   0x3000_2000
                         └─ apb_bridge ── peri_bus  0x4000_0000 + slot*0x1_0000
```

Peripheral slots (64 KB each) are as follows.

| Slot | Peripheral | Slot | Peripheral |
|---|---|---|---|
| 0 | sleep timer (always on) | 8, 9 | GPIO 0, 1 |
| 1 | timer | 10, 11 | I2C 0, 1 |
| 2 | watchdog | 12 | ADC |
| 3, 4, 5 | UART 0, 1, 2 | 13 | PWM |
| 6, 7 | SPI 0, 1 | 14 | NOR flash controller |

Interrupt numbers equal the slot numbers (0–14). The security engine is
interrupt 16.

`soc_top` has the CPU's connections as ports:

- a system-bus master port (`cpu_req`/`cpu_rsp`);
- the gated clock `cpu_clk` and the reset `cpu_rst_n`;
- `cpu_irq` plus the winning interrupt number;
- `cpu_pwr_on`.

A core model or a bus-functional model drives the port from outside, as the
top-level testbench does.

## Buses

**System bus.** Each master holds a request stable (valid, write, address,
data, byte enables) until it sees a one-cycle `ready`. Read data comes with
that `ready`. An assertion checks this rule.

- The bus grants one master at a time.
- Arbitration is round-robin: the master served last has the lower
  priority. Without this, a CPU polling a status register would starve the
  DMA.
- Addresses that decode to nothing get an error response.
- The memories and register blocks answer one cycle after they are
  selected. With the arbitration cycle, a transfer takes about three system
  clocks.

**Peripheral bus.** It uses an APB-style setup/access handshake with
`pready` wait states.

- The bridge runs on the system clock, but changes its APB outputs only on
  cycles where `peri_tick` is high. `peri_tick` is high one cycle in four.
- Each peripheral's clock is the system clock gated by `peri_tick`, so the
  peripherals run at 50 MHz, edge-aligned with the bridge. The design needs
  no clock-domain crossing.
- A peripheral access costs about 10 to 14 system clocks. The NOR
  controller adds its programmed wait states on top.

## Clocks and reset

**Clock source.** `clk_gen` selects the system clock, using `clk_sel`:

- 0: the external clock `ext_clk`;
- 1: the ADPLL output, which is `xo_clk × pll_mult / pll_div`. For 200 MHz
  from a 25 MHz crystal, use mult 8 and div 1.

`clk_ok` is high when the external clock is selected, or when the ADPLL has
locked. `adpll.sv` is a behavioural model that uses real-valued delays. It
is there for simulation and does not synthesize. A real ADPLL would take its
place.

**Clock gating.** Every peripheral has its own `icg` cell. The cell's enable
is `peri_tick & peri_clk_en[i]`. `peri_clk_en` comes from the PMU's 32-bit
clock gating register: bit *i* set means slot *i* is clocked.

The sleep timer (slot 0) has no enable bit. The clock generator, reset
controller, interrupt controller and PMU run on the ungated system clock.
These are the always-on units.

**Reset.** `reset_ctrl` synchronises `por_n`. It releases the system reset
8 cycles after both of these hold:

- the pin is high;
- `clk_ok` is high.

The watchdog's reset request restarts the same sequence. The CPU domain
reset is also held while the PMU requests it. Each peripheral also has a
soft reset: writing a 1 to bit *i* of `SOFT_RST` resets slot *i* for one
cycle. `CAUSE` records whether the last reset came from power-on or from the
watchdog. Only the pin clears these two registers.

## Power modes

The PMU holds the mode. Software requests a mode by writing `MODE`
(address 0x3000_2000).

| Mode | CPU clock | Peripheral clocks | CPU/memory supply | Leaves by |
|---|---|---|---|---|
| Active (0) | on | per CG register | on | software write |
| Halt (1) | off | per CG register | on | interrupt, reset |
| Snooze (2) | off | all off, except the sleep timer | on | interrupt, sleep timer, reset |
| Shut-down (3) | off | all off, except the sleep timer | **off** | sleep timer, reset |

**Allowed entries.** From Active, any lower mode. From Halt, Snooze. From
Snooze, Shut-down. Other writes are ignored.

**Wake-up inputs:**

- `irq_wake`: the interrupt controller has an enabled interrupt pending.
- `stimer_wake`: the sleep timer expired.

Bits [5:4] of `MODE` report which of the two woke the system.

**Timing of the mode write.** The new mode takes effect in the cycle in
which the bus response to the write is returned. So the CPU always sees its
store complete before its clock stops. When the system wakes from Halt or
Snooze, the CPU clock simply restarts, and the core continues after the
store.

**Shut-down.**

1. The PMU drives `pwr_sleep`, which opens the header switches of the
   CPU/main-memory domain (`power_switch`, a behavioural model).
2. While the domain is off:
   - the CPU's bus port is isolated, so its requests are forced to idle;
   - main-memory accesses are answered with an error;
   - the CPU reset is held.
3. On wake-up, the PMU closes the switches and waits for `vdd_ok`. After
   that it waits a further 16 cycles, then releases isolation and reset. The
   core boots again from its reset vector.

Main memory contents are kept in the model, but real silicon would lose
them. Do not rely on them across a Shut-down.

**Snooze, step by step.** A typical use is the temperature-sensor loop:

1. Read the sensor over I2C, send the value over a UART, and show it on
   GPIO.
2. Load the sleep timer. `PRESCALE` = 999 and `LOAD` = 90,000,000 give 30
   minutes at 50 MHz.
3. Enable the timer with its interrupt.
4. Write the clock gating register.
5. Write `MODE` = 2.
6. When the timer expires, the system is back in Active. Software then
   clears the timer's flag.

## Security engines

- **`aes_core`** handles AES-128, AES-192 and AES-256, encryption and
  decryption.
  - The key is expanded once, one word per clock, into a round-key store.
    After that, each block takes Nr clocks: 10, 12 or 14. For AES-128 that
    is 128 bits per 10 clocks, or 2.56 Gbit/s at 200 MHz.
  - The S-box is computed, not stored: the GF(2^8) inverse, then the affine
    map.
  - Decryption uses the inverse cipher on the same round keys.
- **`des_core`** handles DES and triple-DES (encrypt-decrypt-encrypt).
  - There are three keying options: K1 K2 K3, K1 K2 K1, and K1 K1 K1.
  - It computes one round per clock: 17 clocks per DES block and 49 per
    triple-DES block, including load.
- **`sec_engine`** holds the key registers, control and status.
  - It has a DMA master that reads each block from `SRC` (most significant
    word first), runs the engine, writes the result to `DST`, and repeats
    for `NBLK` blocks.
  - `CTRL[2]` selects decryption.
  - On completion it sets `DONE` and, if enabled, raises interrupt 16.
  - Before starting an AES run, software must load the key (`CMD[1]`) and
    wait for `STATUS[2]`.

## Peripherals

Each peripheral's register map is in the header comment of its file. In
short:

- **timer**: a 32-bit down-counter. It has a prescaler, one-shot or
  periodic mode, an interrupt, and an `expired` pulse. The sleep timer uses
  the same module.
- **wdt**: a 32-bit watchdog, fed by writing 0xA5. On reaching zero it
  raises an interrupt and, if enabled, a reset request.
- **uart**: 8N1 with a 16-bit divider in peripheral clocks. The reset value
  of 434 gives 115200 baud.
- **spi_master**: mode 0, 8-bit, MSB first, with a programmable divider and
  a software chip select.
- **i2c_master**: byte commands (start, stop, write, read, NACK) with an
  open-drain pin interface and clock stretching.
- **gpio**: 8 pins with direction and output registers, a two-flop input
  synchroniser, and rising-edge interrupts.
- **adc_sar**: 12-bit successive approximation. It samples for 4 clocks,
  then decides one bit per clock. The analog front end (`adc_afe`:
  sample-and-hold, DAC and comparator) is a behavioural model.
- **pwm**: a 16-bit period and duty, updated at the end of a period, with
  optional inversion.
- **nor_ctrl**: maps a 64 KB window of a 16-bit asynchronous NOR flash. A
  32-bit read performs two half-word reads, each lasting `WAIT`+1 clocks.
  `WAIT` is at offset 0xFFFC and resets to 3. The controller is read-only.

## Simulating

Each file holds one module, package or interface. Each block has a
self-checking testbench `tb/tb_<module>.sv`. A testbench prints
`TB_RESULT checks=N failures=M`, has a watchdog, and stops with `$finish`.
With Verilator 5:

```
verilator --binary --timing --top-module tb_soc_top -y rtl -y tb +libext+.sv \
          -Irtl -Itb rtl/soc_pkg.sv tb/tb_soc_top.sv
./obj_dir/Vtb_soc_top
```

Start every reset high and drop it after 1 ns, because a two-state
simulator only applies an asynchronous reset on an edge. The testbenches do
this.

`tb_soc_top` runs the whole chip at its default sizes: 200 MHz from the
ADPLL, 64 KB of memory and all peripherals. The testbench plays the CPU and
models the board: a NOR flash, a temperature sensor at I2C address 0x48, a
Bluetooth UART receiver, an SPI loop-back and the ADC input. It walks
through the following steps:

1. Reset released only after PLL lock.
2. Boot words read from NOR flash (with wait states) and copied into main
   memory.
3. An SRAM buffer access, and an unmapped address that returns an error.
4. The sensor read over I2C, sent over the UART and shown on GPIO.
5. An ADC conversion, an SPI transfer and a PWM waveform.
6. AES encryption of the FIPS-197 vector by DMA, while the CPU polls. This
   makes both bus masters contend.
7. A soft reset, and clock gating by the register.
8. Halt, woken by a timer interrupt.
9. Snooze, woken by the sleep timer, with peripheral clocks verified to be
   stopped.
10. Shut-down, with the supply off, the CPU in reset, and a reboot.
11. A watchdog reset that arrives in Halt and brings the platform back to
    Active.

It counts each of these mechanisms and fails if any never happened. It
finishes in a few seconds of simulation time.

## Where this design departs from, or adds to, the platform description

**Taken from the platform description:**

- the set of blocks;
- 32-bit buses at 200/50 MHz;
- 64 KB main memory and the 16 KB buffer;
- the 25 MHz reference and ADPLL;
- 32-bit timers, one of them the sleep timer;
- 32 interrupts with programmable priority;
- the 32-bit clock gating register;
- the four modes and their transitions;
- header-switch power gating of the CPU/memory domain;
- reset after clock stabilisation, and per-peripheral soft reset;
- AES-128/192/256, DES and triple-DES with a one-bit encrypt/decrypt select;
- the AES-128 rate of 10 clocks per block;
- the 12-bit SAR ADC.

**This design's own choices** (each one is documented in its file):

- both bus protocols and the arbitration;
- the address map and interrupt numbering;
- every register map;
- the numbers of UART, SPI, I2C and GPIO instances: 3, 2, 2 and 2;
- peripheral widths and frame formats;
- the DMA for the security engines;
- the 4-bit priority field in the interrupt controller, with ties won by the
  lower number;
- the reset hold and power-up wait times;
- the NOR interface;
- the key-schedule precomputation in AES.

**Not included:**

- the ARM926EJ-S core;
- the crystal oscillator and the external NOR flash (the testbenches model
  them);
- the on-chip debugger that talks to the core over its coprocessor
  interface.

The ADPLL, the power switch and the ADC front end are behavioural models.

**Known limits:**

- Main memory is not cleared by Shut-down.
- The interrupt controller's sources are levels, so a peripheral's flag
  must be cleared in the peripheral.
- The boot path over the UART (USB boot) is a software matter, and no
  hardware is provided for it beyond the UARTs.
