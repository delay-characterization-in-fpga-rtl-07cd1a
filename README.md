# Ring-oscillator delay characterization for a reconfigurable FPGA region

Logic in an FPGA ages unevenly: the elements that switch most slow down
first. A runtime-reconfigurable system that knows which part of a
reconfigurable region is slow can place its next accelerator elsewhere.
This design measures that speed. It fills the region with one ring
oscillator per CLB (the FPGA's logic cluster), runs one row of oscillators
at a time, and counts each oscillator's periods against a reference clock.
A workstation drives the measurement over a serial line and gets back one
count per column. A slower CLB gives a lower count.

The target device is a Xilinx Virtex-5, where a CLB has two slices of four
6-input LUTs each. The control logic is ordinary synthesizable
SystemVerilog. The oscillators themselves are hand-placed, hand-routed
hard macros in the real device, so here they are a behavioural simulation
model (`ro_clb`, `ro_array`).

## The CLB ring oscillator

Each oscillator uses all eight LUTs of one CLB plus the first XOR gate of
the slice's carry chain, nine stages in all:

```
 enable ──►XOR──► LUT ─► LUT ─► LUT ─► LUT ─► LUT ─► LUT ─► LUT ─► LUT ─┐
            ▲      (slice 1, four LUTs)        (slice 0, four LUTs)      │
            └────────────────────────────────────────────────────────────┘
                                                                        └─► out (via proxy)
```

* **Every LUT holds the 6-input XOR** `O = A1 ^ A2 ^ A3 ^ A4 ^ A5 ^ A6`.
  Toggling any single input flips the output. So whichever pin carries the
  loop, the LUT acts as an inverter or as a buffer, and every truth-table
  bit can be reached.
* **One pin per LUT carries the loop.** It has the same pin number in all
  eight LUTs (`LOOP_PIN`). That choice is fixed when the FPGA is
  configured, so there are six *test configurations*, one per pin.
* **The other five pins of every LUT take a shared 5-bit test case.**
  Sweeping it (32 *test cases*) walks the loop through different
  multiplexer paths inside each LUT. Over 6 x 32 runs, every path and
  every table bit of every LUT is exercised.
* **The carry-chain XOR is the enable.** The eight LUTs share the same
  test case, so together they never invert. With `enable = 1` the XOR
  adds the ninth, odd inversion and the loop oscillates. With `enable = 0`
  the loop holds still.
* **A proxy CLB sits beside each oscillator.** Its LUTs are identity
  functions. They drive the test-case nets, and they buffer the output so
  that the wire to the counter cannot load the loop. The proxy stops the
  vendor router from swapping the (logically equivalent) XOR inputs back
  onto one pin. Its cost is that an array covers only every other CLB
  column. Full coverage of a region therefore takes 6 pins x 2 placements
  = 12 configurations.

In `ro_clb` the loop is real logic: eight `lut6` instances and the XOR.
Only the delay is lumped. The XOR output follows its input one *loop
delay* later, and the frequency is `1 / (2 x loop delay)`. The default loop
delay comes from vendor timing estimates:

| loop pin | intra-CLB routing | + 8 LUTs x 86 ps + XOR 117 ps | model frequency |
|---|---|---|---|
| 1 | 7825 ps | 8630 ps | 57.9 MHz |
| 2 | 6838 ps | 7643 ps | 65.4 MHz |
| 3, 4 | 4737 ps | 5542 ps | 90.2 MHz |
| 5 | 2963 ps | 3768 ps | 132.7 MHz |
| 6 | 2545 ps | 3350 ps | 149.3 MHz |

These are estimates, and pessimistic ones. On silicon the pin-6 oscillator
runs at about 230–250 MHz. `ro_array` adds a fixed per-CLB offset of
`((7 r + 13 c) mod 17) x 10 ps`, a spread of about 5 %, which is of the
order seen on silicon. Its parameters `AGED_ROW`, `AGED_COL` and `AGED_PS`
slow down one chosen CLB. Both exist only so that the simulated
measurement has something to find.

The frequency of a real oscillator depends on the parity of the test case,
by about 5 %. The LUT model used here does not explain that effect, and
`ro_clb` does not reproduce it.

## Measuring one row

```
             row select ─► selection_wrapper ─► row_en[ROWS] ─► ro_array (ROWS x COLS)
                                   ▲                                  │ ro_out
                                   └── column muxes ◄─────────────────┘
                                            │ col_osc[c]   (clock of counter c)
 ref clock ─► ref_timer ──► ro_ctrl_fsm ──► osc_counter x COLS ─► counts
```

`ro_ctrl_fsm` sequences one measurement. Its states and outputs are:

| state | rst_t | rst_c | en_t | en_c | en_r | wr | leaves when |
|---|---|---|---|---|---|---|---|
| Idle | 1 | 1 | 0 | 0 | 0 | 0 | instruction = START |
| Pre Run | 0 | 0 | 1 | 0 | 1 | 0 | after `PRE_RUN_CYCLES` (4096) |
| Timer Reset | 1 | 0 | 0 | 0 | 1 | 0 | next cycle |
| Measure | 0 | 0 | 1 | 1 | 1 | 0 | after `set_time` cycles |
| Send Out | 0 | 0 | 0 | 0 | 0 | 1 | next cycle |
| Measure End | 0 | 0 | 0 | 0 | 0 | 0 | instruction = RESET |

The pre-run gives the oscillators time to settle before counting starts.
The Measure window is exactly `set_time` reference cycles, because the
count is compared one cycle early. The counters keep their values in
Measure End and can be read any number of times. The frequency is:

```
f_osc = count / set_time x f_ref        (f_ref = 100 MHz)
```

Each `osc_counter` is clocked by its oscillator. Its enable `en_c` comes
from the reference-clock domain and is not synchronised. A count can
therefore be off by one period at each end of the window. Its reset is
asynchronous, because the oscillator that clocks it is stopped while the
counter is reset. The count register also powers up at 0, as FPGA
configuration sets it. The reset may be high from power-up until the
first measurement, and then the counter never sees a reset edge.

With 16-bit counters, a window of `N` cycles at frequency `f` must
satisfy `N x f / 100 MHz < 65536`. For example, a 300 MHz oscillator fits
with a 20000-cycle window. Precision stops improving at about 3000
cycles, where self-heating starts to matter. That is the reset value of
`set_time`.

## Serial protocol

The link runs RS-232 at 9600 baud, with 8 data bits, odd parity, one stop
bit and no flow control. `data_ctrl_fsm` reads one command byte at a time:

| byte | command | then |
|---|---|---|
| 0 | Reset | instruction := RESET (measurement controller back to Idle) |
| 1 | Start | instruction := START; results are sent when the measurement ends |
| 2 | Set Timer | two bytes, high first: `set_time` |
| 3 | Set Test Case | one byte: test case (low 5 bits used) |
| 4 | Set RO Select | one byte: row to measure |
| 5 | Send Result | re-send the held results |
| other | — | ignored |

The result message is `2 x COLS + 2` bytes. It holds each column's 16-bit
count, high byte first, column 0 first, then the 10-bit temperature code
as a 16-bit word. The code comes from the Virtex-5 System Monitor
(0.49 °C per LSB), which enters on the `temp` port.

The instruction is a level, not a pulse. After a measurement the
controller waits in Measure End until a Reset arrives, and the data
controller waits for the end of a measurement without a timeout. A
workstation must therefore send Reset before each Start after the first.
A typical session is `2 0x0B 0xB8` (3000 cycles), `3 31`, `4 r`, `1`
(read 12 bytes), `0`, then the next row.

The receiver holds a byte, with `rda` set, until the data controller takes
it. A frame that arrives meanwhile is lost, and a frame with bad parity or
a bad stop bit is dropped. Because there is no flow control, the
workstation should leave a byte time between bytes if the controller may
be busy. In practice it takes each byte within a cycle.

## The single ring oscillator prototype

Before the array, one long ring oscillator proved the measurement flow.
It is built here too, in two sizes, 31 and 63 stages, side by side with
the array system in `delay_char_top`. The two prototypes share only `clk`
and `rst_n` with it.

Pressing the button (`cs_start`) turns on the oscillator, a timer and an
8-bit counter. After 100 reference cycles (1 us at 100 MHz) the timer
stops the counter. The count is then the frequency in MHz, and it is shown
on eight LEDs (`cs_leds`). The oscillator keeps running until reset. Its
output also goes to I/O pins directly and through a divide-by-2 and a
divide-by-4 stage (`cs_ro`, `cs_div2`, `cs_div4`), for an oscilloscope
that cannot follow the full frequency.

The model ring (`cs_ring_oscillator`) has one NAND enable stage and
inverters after it, with 210 ps per stage. That gives 76.8 MHz for 31
stages (LEDs `01001100` = 76) and 37.8 MHz for 63 stages. On the board,
the two rings measured 76.9 MHz and 38.4 MHz. The stage structure and the
stage delay are choices of this model.

## Modules

| module | role |
|---|---|
| `dc_pkg` | command codes, instruction enum, control-word struct, delay figures |
| `delay_char_top` | the whole system; ports `clk`, `rst_n`, `uart_rx`, `uart_tx`, `temp`, and the prototype's `cs_*` ports |
| `uart_rx`, `uart_tx` | serial receiver (`rda`/`read`) and transmitter (`write`/`tbe`) |
| `data_ctrl_fsm` | command interpreter, registers, result sender |
| `ro_ctrl_fsm` | measurement sequencer (table above) |
| `ref_timer` | 16-bit reference-cycle counter |
| `osc_counter` | one per column, clocked by the selected oscillator |
| `selection_wrapper` | row-enable decoder and per-column multiplexers |
| `ro_array` | behavioural: ROWS x COLS `ro_clb` with per-CLB offsets |
| `ro_clb` | behavioural: the nine-stage oscillator of one CLB |
| `lut6` | 6-input LUT, XOR by default |
| `case_study_top` | single ring oscillator prototype: ring, control, dividers |
| `cs_ring_oscillator` | behavioural: the 31- or 63-stage ring |
| `cs_measure` | prototype control: 100-cycle timer and 8-bit counter |
| `freq_divider` | divide-by-2 and divide-by-4 toggle stages |

The top-level parameter defaults match the array as measured on silicon:
100 MHz, 9600 baud, 20 rows x 5 columns (a 20 x 10 CLB area with the
proxies), loop pin 6, a 4096-cycle pre-run and 16-bit counters.
`LOOP_PIN` selects the test configuration.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N
failures=M`. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl rtl/dc_pkg.sv tb/tb_delay_char_top.sv \
  --top-module tb_delay_char_top -o sim && obj_dir/sim
```

* `tb_<module>`: unit tests, one per module.
* `tb_delay_char_top`: end to end on a 4 x 3 array with fast serial and an
  aged CLB. It checks every command, the oscillator run time
  (pre-run + 1 + window), the counts against the model, re-sending, an
  out-of-range row and locating the aged CLB. It also runs both
  prototypes once.
* `tb_delay_char_top_full`: the unmodified top (100 MHz, 9600 baud,
  20 x 5). It runs both prototypes, then measures rows 19 and 0. That
  is about 48 ms of simulated time and 1.5 minutes of run time.
* `tb_delay_char_workloads`: the full array with fast serial. It runs a
  window sweep from 1000 to 25000 cycles, all 32 test cases, and a map of
  all 20 rows in which the slowest and fastest CLBs must be the ones the
  offsets predict.
* `tb_delay_char_configs`: six small systems side by side, one per loop
  pin (the six test configurations), measured in parallel against the
  per-pin loop delays.

`data_ctrl_fsm` and `ro_ctrl_fsm` carry assertions for the handshake
rules. `read` is given only with `rda`, and `write` only with `tbe`,
never twice in a row. The counters never run with the oscillators off or
in reset. Simulate with `--assert` to check them.

Synthesis tools report combinational loops through `lut6`. Those loops are
the oscillators. On an FPGA, the `ro_clb` and `ro_array` models are
replaced by placed hard macros. Everything else synthesizes as written.

## Choices not fixed by the measurement method

These are choices of this implementation. Change them freely, but keep
the workstation side consistent:

* 16-bit oscillation counters, which wrap on overflow.
* The byte order (high byte first) and the content of the result message.
* One stop bit (`STOP_BITS` in `uart_tx`).
* Out-of-range rows select nothing, and the counts come back as 0.
* A `set_time` of 0 behaves as 1.
* The level-held instruction. RESET is honoured only in Measure End.
* How the test-case bits map onto the free LUT pins: bit 0 goes to the
  lowest-numbered free pin.
* The oscillator output is taken from the LUT that feeds the XOR.
* The prototype's 8-bit count wraps, so it reads frequencies above
  255 MHz modulo 256.

Not included: the System Monitor (a vendor block; its code is an input
here) and the proxy as a separate instance (it is logically a wire).
