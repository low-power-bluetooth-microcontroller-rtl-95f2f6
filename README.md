# Low-power Bluetooth microcontroller core: clock gating and a Gray-coded bus bridge

A small Bluetooth microcontroller spends almost all of its dynamic power in
the clock network. It does so even though most of its peripherals are idle
most of the time. This core attacks that waste in two ways:

1. **Per-block clock gating.** Every block sits behind its own latch-and-AND
   clock gate. It receives a clock edge only in cycles where it has something
   to do: it is addressed, it is finishing a bus transfer, or it has internal
   work such as a running counter or a byte on the wire. The processor clock
   stops while the processor sleeps. An interrupt restarts it.
2. **A Gray-coded AHB-to-APB bridge.** Nearly all traffic between the
   processor and the peripherals crosses the bridge. Its state register is
   Gray-coded, so each step of a transfer flips one state bit instead of up
   to three.

The core is the bus fabric and peripherals around an ARM Cortex-M0:

```
 Cortex-M0 (external) ── AHB-Lite ──┬── SRAM (16 KB)
                                    ├── GPIO (32 bit)
                                    └── AHB→APB bridge (Gray FSM)
                                          │  APB
          ┌──────┬──────────┬──────┬──────────┬──────┬──────┬───────────┬────────────┐
        timer  dual timer  UART  watchdog   SPI    RTC   BLE slot   TDSP slot
                                                         (external)  (external)
```

The processor and its wake-up interrupt controller are not in the RTL. Nor
are the Bluetooth baseband/radio unit (BLE) or the TDSP peripheral. The top
module `bt_soc_top` brings out three things for them:

- the AHB master port and the sleep/clock signals of the processor;
- two complete APB slots (gated clock, select, response, clock request and
  interrupt) for BLE and TDSP.

## Clock gating

### The gate

`clock_gate` is the standard glitch-free gate:

- A latch is transparent while `clk` is low. It captures the enable.
- An AND gate combines the latched enable with `clk`.

The enable may change at any time in the cycle. The latch holds it through
the high phase, so `gclk` only ever carries whole clock pulses. Lint tools
report the latch. It is intentional. In a real flow this cell would be
replaced by the library's integrated clock-gating cell.

### Who gets a clock, and when

| clock | enable | runs when |
|---|---|---|
| `sram_clk` | `hsel_sram & addr_phase \| busy` | an SRAM transfer is addressed, or its write data phase is pending |
| `gpio_clk` | `hsel_gpio & addr_phase \| busy` | the same, for GPIO registers |
| `bridge_clk` | `hsel_apb & addr_phase \| busy` | an APB transfer is addressed, or the bridge FSM is out of IDLE |
| `slot_clk[i]` (8 APB slots) | `pclken & (psel_slot[i] \| clk_req[i])` | on APB clock cycles, while the slot is selected or asks for its clock |
| `cpu_hclk` | `~cpu_sleeping \| (\|irq)` | the processor is awake, or any interrupt is pending |

Each APB peripheral drives its own `clk_req`:

| peripheral | `clk_req` is high while |
|---|---|
| timer | enabled |
| dual timer | either channel runs |
| watchdog | enabled |
| UART | a byte waits or is being sent, or the receiver is enabled |
| SPI | a frame is in flight |
| RTC | started |

With every block idle, `clk_req` is low everywhere. A slot's clock then stops
entirely between accesses, and the peripheral loses no state. Only three
parts run on the free clock `hclk`:

- the AHB address decoder and response multiplexer;
- the GPIO input synchroniser;
- the 3-bit APB clock divider.

**APB clock.** `pclken` is high on one `hclk` cycle out of
`apb_clk_div + 1`. APB slots are clocked only on those cycles, so the APB
runs at `hclk / (apb_clk_div + 1)` without a second clock domain.

**Reset and gated flip-flops.** Every flip-flop uses the asynchronous
active-low `hresetn`. It does not depend on its clock running. A testbench
must still produce a real falling edge on `hresetn` (start it at 1). If reset
is simply held low from time zero, some simulators never trigger the
asynchronous branch of a flip-flop whose clock is gated off.

## The bridge state machine

`ahb_apb_bridge` is an AHB-Lite slave. It turns each accepted transfer into
one APB3 transfer.

| state | code | meaning | HREADYOUT |
|---|---|---|---|
| `ST_IDLE` | 000 | no transfer | 1 |
| `ST_WAIT` | 001 | transfer accepted, waiting for `pclken` | 0 |
| `ST_TRNF_1` | 011 | APB setup phase (PSEL=1, PENABLE=0) | 0 |
| `ST_TRNF_2` | 010 | APB access phase (PENABLE=1), held until PREADY | 0 |
| `ST_TRNF_OK` | 110 | done, read data returned | 1 |
| `ST_TRNF_ERR_1` | 111 | first ERROR cycle after PSLVERR | 0, HRESP=1 |
| `ST_TRNF_ERR_2` | 101 | second ERROR cycle | 1, HRESP=1 |

The transitions:

- **IDLE → WAIT** when a transfer is accepted (`HSEL & HREADY & HTRANS[1]`).
- **WAIT → TRNF_1 → TRNF_2** advance only on cycles with `pclken`. This is
  what lets the APB run slower than the AHB.
- **TRNF_2** leaves on `pclken & PREADY`. It goes to TRNF_OK, or to TRNF_ERR_1
  if PSLVERR is set.
- **TRNF_ERR_1 → TRNF_ERR_2** always. This gives the two-cycle ERROR response
  that AHB-Lite requires.
- **TRNF_OK and TRNF_ERR_2** accept the next transfer. They go:
  - straight to TRNF_1 when `pclken` is high;
  - to WAIT when it is not;
  - back to IDLE when nothing is selected.

The codes are the first seven entries of the 3-bit reflected Gray sequence,
assigned in path order. Every step of a normal transfer flips exactly one
bit:

- IDLE → WAIT → TRNF_1 → TRNF_2 → TRNF_OK;
- TRNF_ERR_1 → TRNF_ERR_2.

A few return arcs are not single-bit steps, because seven states with arcs
back to IDLE, WAIT and TRNF_1 cannot all be adjacent:

- OK → IDLE flips two bits;
- ERR_2 → TRNF_1 flips two bits;
- TRNF_2 → ERR_1 flips two bits.

An assertion in the module checks the one-bit property on the normal path.
A second assertion checks that every access phase follows a setup phase.

**Timing.** At `apb_clk_div = 0` an isolated transfer holds HREADY low for 3
cycles: WAIT, TRNF_1, TRNF_2. A transfer that directly follows another skips
WAIT, so it holds HREADY low for 2 cycles. Each APB wait state (PREADY low)
adds one APB cycle in TRNF_2. The address is registered at acceptance.
PWDATA is taken from HWDATA, which stays stable because HREADY is low. Read
data is registered at the end of the access phase.

## Address map

| HADDR | target |
|---|---|
| `0x0000_0000` | SRAM, 16 KB (`SRAM_ADDR_WIDTH = 14`), mirrored within the first 64 KB |
| `0x4000_0000` + 4 KB × n | APB slot n: 0 timer, 1 dual timer, 2 UART, 3 watchdog, 4 SPI, 5 RTC, 6 BLE, 7 TDSP |
| `0x4001_0000` | GPIO |
| anything else | two-cycle AHB ERROR from the default slave |

An APB slot with no peripheral answers PSLVERR. The bridge turns that into an
AHB ERROR.

The interrupt lines map to `irq[7:0]` in slot order:

| bit | source |
|---|---|
| 0 | timer |
| 1 | dual timer |
| 2 | UART |
| 3 | watchdog |
| 4 | SPI |
| 5 | RTC |
| 6 | BLE |
| 7 | TDSP |

The watchdog also drives `wdog_reset_req`.

## Peripheral registers

Every peripheral is an APB3 slave with no wait states. Offsets are from the
base of its slot.

- **Timer** (32-bit down counter):
  - `0x00 CTRL`: [0] enable, [3] interrupt enable.
  - `0x04 VALUE`.
  - `0x08 RELOAD`.
  - `0x0C INTSTATUS` (write 1 to clear).
  - The interrupt period is RELOAD + 1 APB cycles.
- **Dual timer**: two channels at `+0x20·n`. Each has:
  - `LOAD` (a write also loads the count);
  - `VALUE`;
  - `CTRL`: [0] enable, [1] one-shot, [2] interrupt enable;
  - `INTCLR`, `RIS`, `MIS`.
  - A one-shot channel clears its enable at zero.
- **Watchdog**:
  - `0x00 LOAD`.
  - `0x04 VALUE`.
  - `0x08 CTRL`: [0] count and interrupt enable, [1] reset enable.
  - `0x0C INTCLR` (clears the interrupt and reloads).
  - `0x10 RIS`, `0x14 MIS`.
  - The first timeout raises the interrupt. A second timeout, with the
    interrupt still pending and reset enabled, raises `reset_req`.
- **UART** (8N1, LSB first):
  - `0x00 DATA`.
  - `0x04 STATE`: [0] TX full, [1] RX full, [2] TX overrun, [3] RX overrun.
  - `0x08 CTRL`: [0] TX enable, [1] RX enable, [2] TX interrupt enable,
    [3] RX interrupt enable.
  - `0x0C INTSTATUS`.
  - `0x10 BAUDDIV`: clocks per bit, at least 2, 20 bits. For example,
    139 gives 115200 baud at 16 MHz.
  - The receiver synchronises RXD and samples each bit in its middle.
- **SPI master** (mode 0, 8-bit, MSB first):
  - `0x00 DATA`: a write starts a frame.
  - `0x04 STATUS`: [0] busy, [1] done.
  - `0x08 CTRL`: [0] enable, [1] drive SS low, [2] interrupt enable.
  - `0x0C CLKDIV`: SCLK half period = CLKDIV + 1 clocks.
- **RTC**:
  - `0x00 DR`, `0x04 MR`, `0x08 LR` (a write loads DR), `0x0C CR` [0] start.
  - `0x10 IMSC`, `0x14 RIS`, `0x18 MIS`, `0x1C ICR`.
  - `0x20 PRESCALE`: clocks per tick minus one. The reset value is
    15 999 999, which gives one tick per second at 16 MHz.
  - The match interrupt fires when the count steps onto MR.
- **GPIO** (AHB):
  - `0x00 DATA`: read the synchronised pins, write the output value.
  - `0x04 DATAOUT`.
  - `0x10 OUTENSET`, `0x14 OUTENCLR`.
  - The pad tri-state is outside: `gpio_out`, `gpio_oe`, `gpio_in`.

## How far it follows the source design, and where it departs

**Taken from the source design:**

- The block set and the bus structure.
- The 32-bit GPIO.
- The SPI pin set (MISO, MOSI, SS, SCLK).
- The 16 MHz system clock.
- Clock gating of the whole chip with a latch-and-AND gate.
- The seven bridge states and their transitions, including the PCLKEN
  conditions and the two error states.
- Gray-coded bridge states.

**Choices of this implementation**, where the source is silent:

- the memory map and the SRAM size;
- every peripheral register layout;
- the exact clock-enable condition of each block;
- the APB clock divider;
- which Gray code goes to which state;
- the PREADY hold in the access phase;
- single asynchronous reset.

The peripherals are deliberately simple, complete implementations of what
their names imply. They are not models of any vendor's parts. Not included:
the processor, the wake-up interrupt controller, the BLE unit and the TDSP
block. The core does not know their internals, and provides only their
connection points.

## Simulation

Each testbench in `tb/` is self-checking. It ends by printing
`TB_RESULT checks=N failures=M`, and it has a cycle watchdog. To run one with
Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/bt_soc_pkg.sv \
    tb/tb_bt_soc_top.sv --top-module tb_bt_soc_top
./obj_dir/Vtb_bt_soc_top
```

The package file is given explicitly. Verilator finds all other modules
through `-Irtl -Itb`. The simulator runs with two-state values, so every
testbench initialises what it reads.

| testbench | what it covers |
|---|---|
| `tb_bt_soc_top` | The whole core at default parameters, driven by an AHB master model (`ahb_master_bfm`). It exercises every peripheral, register models on the BLE and TDSP slots, an unmapped address, PREADY wait states, PSLVERR, back-to-back transfers, a half-rate APB and a sleep/wake cycle. It counts each mechanism: every clock both running and gated, the bridge WAIT and access-hold loops, error responses, one-bit state steps. It fails if one never happens. |
| `tb_power_workloads` | Four operating scenarios: Bluetooth transmit (through a radio model on the BLE slot), sleep, timer and UART. For each it reports clock pulses delivered against ungated cycles, and bridge state-bit toggles against plain binary state codes. |
| `tb_<block>` | One per block. Each compares against values worked out in the testbench, including cycle counts: bridge latency, timer periods, baud and SCLK timing. |

Sample output of `tb_power_workloads` at default parameters:

| scenario | block clock pulses delivered | bridge state-bit toggles (Gray vs binary) |
|---|---|---|
| Bluetooth transmit | 15% of ungated | 96 vs 128 |
| sleep | 0% | 0 vs 0 |
| timer | 10% | 66 vs 88 |
| UART | 17% | 162 vs 216 |

These are activity counts, not power figures. Power would need a gate-level
netlist of a specific process.
