# Swept quadrature reference and control logic for a synchronous-detector spectrum analyser

A spectrum analyser can do its heavy arithmetic in analog circuitry. In that
approach, an analog *synchronous detector* multiplies the input signal by a
sine and a cosine at a known frequency and low-pass filters the two products.
The result is the input's spectral content at that frequency. Sweeping the
reference frequency slowly across a band gives the spectrum. All that is left
for the digital side is:

* making the quadrature reference: sine and cosine at the same, precisely
  tunable frequency, up to a few kHz, with a 0–3.3 V swing;
* stepping that frequency linearly from MIN to MAX, in STEP increments, once
  every interval Δt, and starting over at the end;
* getting the samples to a DAC, and reading results back through an ADC;
* a user interface (buttons, rotary switch, LCD, LEDs, RS232) to set MIN, MAX,
  STEP and Δt.

This RTL is the FPGA part of that digital side, as planned for a Spartan-3E
board with its LTC2624 DAC and its LTC6912-1/LTC1407A-1 analog capture
circuit. In the original plan a soft processor runs the sweep loop and the
sample transfer in software. Here both loops are logic: `sweep_ctrl` steps the
tuning word and `dac_ltc2624_ctrl` streams the samples. The processor is left
with what a processor is good at: the user interface. The processor itself is
not included. Its peripheral bus, interrupt line, reset and local-memory ports
are the top level's ports.

```
            bus (from processor)                         irq (to processor)
                 |                                             ^
          pbus_decoder --+-----+------+------+------+------+---+--+------+
                         |     |      |      |      |      |      |      |
                  sweep_ctrl timer0 timer1  gpio_ui rotary uart  adc_ctrl dac_ltc2624_ctrl
                     ^   |    |(tick)                                 |      ^     |
                     |   |    +---> delta-t                           |      |     +--> DAC SPI
                     |   +-- FTW --> dds_quad -- sin/cos -------------|------+
                     +----------------------------------------------- |
                                                        preamp/ADC SPI <+
   lmb_bram (32 kB, instruction + data ports)      proc_sys_reset       intc
```

## The generator: tuning word, DDS and DAC stream

This is the part the rest serves. It is also where the numbers matter.

**Tuning word.** `dds_quad` has a 25-bit phase accumulator that adds the
frequency tuning word (FTW) on every 50 MHz clock, so

    f_out = FTW × 50 MHz / 2^25      (1 LSB = 1.49 Hz)

The 25 bits are the fewest that keep one step below 2 Hz at 50 MHz. The
`initial` assertion in `dds_quad` checks this for any `CLK_HZ`/`PHASE_W` you
set. At 10 kHz the FTW is 6711.

**Sine and cosine.** The top 12 phase bits address a 1024-entry quarter-wave
table, `T[i] = round(8191 · sin(π/2 · (i + ½)/1024))`. The table is computed at
elaboration with `$sin`, so no data file is needed. The two quadrant bits fold
the address (bit 10 mirrors it) and pick the sign (bit 11). The half-step
offset makes the fold exact, so no entry is duplicated at the quadrant
boundaries. The cosine is the same lookup done 1024 steps (a quarter turn)
ahead, read through a second port of the same table. Outputs are 14-bit
two's complement, ±8191, two clocks after the accumulator value they belong
to. No phase dithering is applied.

**Sweep.** `sweep_ctrl` holds MIN, MAX and STEP in registers. The flow is:
put FTW out, wait for a Δt tick, add STEP, and if the sum has reached MAX go
back to MIN. The tuning words sent are therefore MIN, MIN+STEP, … up to the
last one below MAX. MAX itself is never sent. The source flow chart tests
`FTW == MAX`. Here the test is `FTW + STEP >= MAX`. The two agree whenever
MAX − MIN is a multiple of STEP, and only the second cannot run past MAX when
it is not. While disabled, FTW is held at MIN. Δt comes from `interval_timer`
instance 0 in auto-reload mode, so a tick comes every LOAD+1 clocks. FTW
changes on the clock after the tick, and `wrap_o` marks each restart. Timer 0
runs on its own, so the first interval after enabling the sweep can be
shorter than Δt. Start timer 0 after the sweep, as the testbench does, if
that matters.

**DAC stream.** `dac_ltc2624_ctrl` takes a sine/cosine pair in one clock and
turns each value into a 12-bit offset-binary code: it drops the two low bits
and inverts the sign bit, so −8192 → 0, 0 → 2048 and +8191 → 4095. It then
sends two 32-bit SPI frames:

| frame | bits 31:24 | 23:20 command | 19:16 address | 15:4 data | 3:0 |
|---|---|---|---|---|---|
| 1 | 0 | `0000` write input register | `0010` channel C | sine code | 0 |
| 2 | 0 | `0010` write input register, update all | `0011` channel D | cosine code | 0 |

C and D are the DAC channels referenced to 2.5 V. The outputs therefore swing
0–2.5 V around 1.25 V, inside the 3.3 V limit. The sine goes into C's input
register first, but it reaches the pin only with the second frame, at the
same moment as the cosine. The two analog outputs therefore never carry
samples from different instants. SCK is clk/4 (12.5 MHz, `HALF`=2). A pair
takes 2·(4·32+1)+3 = 261 clocks, which is about 191 k pairs/s, or 19 pairs
per period at 10 kHz. The DAC only samples the DDS at that rate. The DDS
itself runs at the full clock, so the phase stays exact while whole samples
are skipped.

## The processor boundary

The soft processor, its clock manager and the board parts are outside this
RTL. What a processor would see:

* **Peripheral bus** (`bus_sel`, `bus_we`, `bus_addr[7:0]`, `bus_wdata`,
  `bus_rdata`, `bus_err`). This is a simple single-cycle register bus, not the
  vendor bus: hold `bus_sel` for exactly one clock per access. A write takes
  effect on that edge, and read data is valid combinationally in the same
  cycle. A read with a side effect (UART receive) acts on that edge too. An
  address with no peripheral reads zero and raises `bus_err`. The request
  types are in `sa_pkg`.
* **Local memory** (`ilmb_*`, `dlmb_*`). `lmb_bram` is one 32 kB memory (8192
  × 32) with an instruction read port and a data port with byte enables. Both
  take word addresses and have one clock of latency. A data write returns the
  old word.
* **Interrupt** `irq` from `intc`, and **reset** `sys_rst` from
  `proc_sys_reset`. Reset is asserted at once by `ext_rst` or by a low
  `dcm_locked`. It is released synchronously, on the 19th clock edge after
  both have cleared (2 synchroniser stages plus 16 clocks of hold).

### Register map (word addresses, upper nibble = peripheral)

| base | block | registers (low nibble) |
|---|---|---|
| 0x00 | `sweep_ctrl` | 0 CTRL (b0 enable) · 1 MIN · 2 MAX · 3 STEP · 4 FTW (ro) · 5 sweeps completed (ro) |
| 0x10 | `interval_timer` 0 (Δt) | 0 CTRL (b0 enable, b1 auto-reload, b2 irq enable) · 1 LOAD · 2 COUNT (ro) · 3 STATUS (b0 expired, w1c) |
| 0x20 | `interval_timer` 1 | same as timer 0 |
| 0x30 | `gpio_ui` | 0 LED · 1 LCD (b3:0 data, b4 E, b5 RS, b6 RW) · 2 buttons (ro) · 3 change bits (w1c) · 4 IER |
| 0x40 | `rotary_filter` | 0 position (ro, signed) · 1 STATUS (b0 step seen w1c, b1 direction, b2 irq enable) |
| 0x50 | `intc` | 0 ISR (ro) · 1 IER · 2 IAR (w1 clears) · 3 IPR (ro) · 4 MER (b0) |
| 0x60 | `uart_lite` | 0 RXDATA (read pops) · 1 TXDATA · 2 STATUS (b0 rx valid, b1 tx busy, b2 overrun, b3 framing) · 3 CTRL (b0 irq enable, write b1 clears errors) |
| 0x70 | `adc_ctrl` | 0 GAIN (b3:0 A, b7:4 B; write sends) · 1 CTRL (write b0 converts) · 2 DATA (ch1 in 29:16, ch0 in 13:0) · 3 STATUS (b0 busy, b1 done w1c, b2 irq enable) |
| 0x80 | `dac_ltc2624_ctrl` | 0 CTRL (b0 stream enable) · 1 pairs sent (ro) · 2 codes being sent (ro) |

Interrupt sources: 0 timer 0, 1 timer 1, 2 buttons, 3 rotary switch, 4 UART
receive, 5 ADC done. `intc` latches the rising edge of each peripheral's
level request. A request that stays high does not fire again until it has
dropped, so clear the peripheral's flag before acknowledging in IAR.

A program following the original flow chart would: write MIN, MAX and STEP;
write timer 0's LOAD = Δt·50 MHz − 1; set sweep CTRL = 1 and DAC CTRL = 1;
start timer 0 with CTRL = 3. From then on it only needs to handle button and
rotary interrupts to change those constants.

## User interface and capture peripherals

* **`rotary_filter`.** Removes contact bounce from the rotary switch without
  software help. After a two-flip-flop synchroniser, state bit q1 is set only
  when both contacts read 1 and cleared only when both read 0. State bit q2
  records which contact led (A=0,B=1 sets it; A=1,B=0 clears it). Bounce on
  one contact only moves between a "hold" pattern and its neighbour, so q1
  cannot chatter. Each rising edge of q1 is one detent, and q2 gives the
  direction. Latency is 4 clocks.
* **`gpio_ui`.** LED and LCD pins come straight from registers; the LCD is
  driven pin by pin from software. The five buttons are synchronised, and any
  change sets a sticky bit that can interrupt.
* **`uart_lite`.** 9600 baud, 8N1, one-byte receive buffer with overrun and
  framing flags. The receiver samples each bit at its middle, so it tolerates
  a few percent of clock mismatch (tested at 2%).
* **`adc_ctrl`.** A GAIN write sends an 8-bit frame {gain B, gain A} to the
  preamplifier with `amp_cs_n` low. A CTRL write pulses `ad_conv` for one
  clock and then clocks 34 bits in from the ADC. Of those 34 bits, 31:18
  hold channel 0 and 15:2 hold channel 1, both 14-bit two's complement.
  `DATA` returns them sign-extended. The preamplifier and the ADC are referenced to 1.65 V, so a code of 0 means
  an input at 1.65 V; the gain scales the input about that level. A conversion takes 139 clocks from the
  write to `sample_done`. Requests made while busy are ignored. Both parts
  share one `spi_master` (mode 0, MSB first).

## Departures and choices

From the source design description: the block set (Fig.-level: DDS, processor
with GPIO, timers, interrupt controller, SPI, UART, 32 kB memory on local
buses, reset, rotary-switch filter), sine+cosine outputs of 14 bits, tuning
resolution below 2 Hz, the LTC2624 with its 12-bit unsigned input and the use
of its 2.5 V channels, the 14-bit two's-complement ADC result, and the sweep
loop (MIN, STEP, Δt, MAX).

Choices made here, where the description is silent:

* the 50 MHz clock, and with it the 25-bit accumulator and 1.49 Hz step;
* the DDS table size and its half-step offset;
* `>=` instead of `==` in the sweep test, explained above;
* doing the sweep and the sample transfer in logic instead of software;
* the whole register map, the single-cycle bus (in place of the vendor
  peripheral bus), the interrupt numbering and the edge capture;
* SPI mode and speed; the DAC command pair that updates both channels at
  once; the converter frame layouts, which follow the parts' data sheets;
* 9600 baud; the reset hold of 16 clocks; 5 buttons and 8 LEDs; the 4-bit LCD
  bus;
* one shared 32 kB memory for instructions and data. The source does not say
  whether 32 kB is the total or per memory.

In the source block structure the tuning word reaches the DDS through a
processor GPIO port. Here `sweep_ctrl` drives it directly, and the
processor sets the sweep through its registers instead.

Known departures from the board as described: the DAC and the ADC front end
have separate SPI pin sets here, while on the board they share SCK and MOSI.
Joining them would need an arbiter that holds the DAC stream during a gain
write or conversion. Nothing is done with ADC results beyond storing them for
the processor, because the source does not say how they are used. There is
no clock manager, so `dcm_locked` is an input.

## How far it has been checked

Every module has a self-checking testbench in `tb/`. Each compares the module
against values computed independently in the testbench, and each ends with a
`TB_RESULT checks=N failures=M` line:

* `tb_dds_quad` checks every sample against real-valued sin/cos (within
  1 LSB), including a tuning-word change while running, and counts zero crossings to check the output
  frequency. At 5 kHz it also checks that the cosine is at its peak each time
  the sine rises through zero.
* `tb_sweep_ctrl` covers sweeps where STEP divides MAX − MIN, where it does
  not, and near the top of the range.
* `tb_dac_ltc2624_ctrl` and `tb_adc_ctrl` run against behavioural models of
  the converters' serial interfaces (`tb/ltc2624_model.sv`,
  `tb/adc_frontend_model.sv`). They check codes, channel choice, simultaneous
  update, frame lengths and cycle counts.
* `tb_rotary_filter` uses randomly bouncing contacts.
* `tb_sa_ctrl_top` runs the whole design at its default parameters. It
  behaves like the processor program: it loads and fetches memory, runs the
  sweep through 13 restarts, and checks every DAC pair. Each sine/cosine pair
  on C/D must lie between 2044 and 2051 codes from mid-scale, so the two outputs
  are in quadrature at full swing. It also serves each interrupt source
  (ADC, rotary switch, button, timer 1, UART receive), echoes a UART byte,
  and resets through loss of lock. It counts each of these mechanisms and
  fails if one never happened.

The converter models encode my reading of the parts' data sheets, not
measurements. Those frame formats are the least certain part of this RTL.
Check them against the data sheets before use on hardware. Nothing here has
been run on an FPGA.

## Simulating

Every file is plain SystemVerilog (IEEE 1800-2017) with one module or
package per file. `sa_pkg.sv` must come first. For example, for the whole
design:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sa_ctrl_top \
    -Irtl -Itb rtl/sa_pkg.sv rtl/*.sv tb/ltc2624_model.sv \
    tb/adc_frontend_model.sv tb/tb_sa_ctrl_top.sv
./obj_dir/Vtb_sa_ctrl_top
```

For a single block, swap the top module and testbench file (for example
`tb_dds_quad` with `tb/tb_dds_quad.sv`). `verilator --lint-only -Wall` is
clean apart from unused-parameter notes from the package and a few unused
bits (the idle bits of the ADC frame).

Parameters worth changing: `CLK_HZ` and `PHASE_W` (keep
CLK_HZ/2^PHASE_W < 2 Hz, which the DDS asserts), `SPI_HALF` (SCK =
clk/(2·SPI_HALF); the LTC2624 allows faster), `BAUD`, `MEM_BYTES` and
`RST_HOLD` on `sa_ctrl_top`.
