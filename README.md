# Peripheral logic for a DSP based motor drive controller

A motor drive control loop has to finish in a few microseconds: read the rotor
position, measure phase currents, compute, and update the power switches. A
fast fixed point DSP (50 MHz clock, 80 ns instruction cycle) can do the
arithmetic in that time. It cannot also decode encoder pulses, time them, or
toggle PWM pins in software without losing most of its cycles. This RTL moves
that input/output work into hardware. The DSP only reads and writes a handful
of I/O ports, and the logic here:

- decodes a quadrature encoder (A, B, index) into a rise-to-rise time,
  a 12-bit position and a direction bit;
- generates eight 8-bit PWM outputs from one shared sawtooth;
- sequences an external 10-bit ADC through its sample and hold phases;
- latches 32 bits of digital input and drives 13 bits of digital output;
- selects the external EPROM and the two SRAM banks, and switches them
  between program and data space;
- stretches slow accesses with wait-states on the DSP's READY line.

The DSP, the UART chip, the ADC chip, the analog multiplexer, the RS-232
drivers, the oscillators and the power-on reset network are separate
components. Their pins are ports of the top module `dsp_motor_controller`.

## I/O port map

The DSP has 16 I/O ports. Ports 0 to 7 are decoded here (`io_decoder`). Ports 8
to 15 (address bit 3 set) are the eight registers of a 16550-type UART.

| Port | Read (IN)                                    | Write (OUT)                                   | Wait-states |
|------|----------------------------------------------|-----------------------------------------------|-------------|
| 0    | general purpose digital input (16 bits)      | digital output [15:3], ADC channel [2:0]      | 0           |
| 1    | S/P/D rise-to-rise time (16 bits)            | PWM1 [15:8], PWM0 [7:0]                       | 0           |
| 2    | direction [15], position [11:0]              | PWM3, PWM2                                    | 0           |
| 3    | digital position input (16 bits)             | PWM5, PWM4                                    | 0           |
| 4    | reads 0                                      | PWM7, PWM6                                    | 0           |
| 5    | ADC result [9:0]                             | ADC start (the value is ignored)              | 1 (read), 0 (write) |
| 6    | reads 0                                      | S/P/D divider load value (16 bits)            | 0           |
| 7    | reads 0                                      | PWM divider load value [7:0]                  | 0           |
| 8-15 | UART register [7:0]                          | UART register [7:0]                           | 5           |

The constants are in `rtl/motor_ctrl_pkg.sv`. Bits that no device drives read
as 0. The original board leaves them floating, so software masks them anyway.

## Bus cycles and wait-states

This is the part that needs the most care, because its behaviour depends on
the cycle model.

**Cycle model.** Everything runs on one clock, `clk` = 50 MHz. The DSP's
CLKOUT1 output (one period per instruction cycle) comes in as `dsp_clkout1`.
Its rising edge, seen on `clk`, is the instruction-cycle enable `cyc_en`. An
external access is any time the strobe is low together with one of the PS, DS
or IS selects. The DSP samples READY at each `cyc_en`. Each sample of 0 is one
wait-state. The access ends at the first sample of 1.

**The generator** (`wait_state_gen`). READY is high unless a slow device is
selected. Two register stages count the wait-states:

```
ws1_req  (ADC read, or UART counter done) -> stage1 at next cyc_en       : 1 wait-state
ws2_req  (EPROM selected)                 -> stage2 -> stage1            : 2 wait-states
hold_req (UART selected)                  -> READY low, no stage set     : until ws1_req
READY = !(access && (ws1_req || ws2_req || hold_req)) || stage1
```

Both stages clear at the `cyc_en` where the access completes. Accesses can
therefore follow each other directly.

**The UART** (`uart_interface`) needs five wait-states. A 4-bit counter is held
at zero while the UART is deselected. Once the select has been registered at
one cycle edge, the counter counts up once per instruction cycle and stops at
three. At three it raises `uartwt1`, which is a one-wait-state request. READY is
sampled low at five edges in total: the select edge, three count edges and the
one-wait-state edge. Registering the select once is this design's choice,
made to reach the stated count of five.

| Access                         | Wait-states | Total cycles |
|--------------------------------|-------------|--------------|
| SRAM1, SRAM2, ports 0-7 (except IN 5) | 0    | 1            |
| IN 5 (ADC result)              | 1           | 2            |
| EPROM                          | 2           | 3            |
| UART, ports 8-15               | 5           | 6            |

## Memory and the XF switch

The external memory is a 64K x 16 EPROM (`eprom`) and two 16K x 16 SRAM banks
(`sram_bank`, instanced as SRAM1 and SRAM2). `memory_select` routes the DSP's
program-space and data-space selects to them. The routing depends on the
DSP's external flag XF:

| XF          | program space | data space | off   |
|-------------|---------------|------------|-------|
| 1 (reset)   | EPROM         | SRAM1      | SRAM2 |
| 0           | SRAM1         | SRAM2      | EPROM |

The usual start-up runs a loader from the EPROM, which has two wait-states. The
loader copies code into SRAM1 as data, then clears XF, and execution continues
from SRAM1 with no wait-states. An SRAM bank decodes only 14 address bits, so
each bank appears four times in the 64K data space. The DSP's on-chip memory
covers the lowest 1K of data addresses. Software reaches the first 1K words of
an SRAM bank through one of the upper copies (4000h, 8000h or C000h). The
EPROM array is cleared to zero. It can be filled from a hex file through the
`EPROM_INIT` parameter.

## ADC conversion sequence

`adc_control` copies the board's counter-and-gates circuit:

1. Software writes the channel number to output port 0, bits 2..0. These bits
   drive the analog multiplexer.
2. Any write to port 5 loads 5 into a down counter. The counter counts once per
   instruction cycle down to 0 and stops there.
3. While the count is nonzero (5 cycles, 400 ns), the ADC is chip-selected with
   S/H low, which means sample. Its RD line is forced high during this time, so
   other DSP reads cannot look like an ADC read.
4. When the count reaches zero, the ADC is deselected and S/H goes high
   (hold). The chip finishes the conversion on its own, 1.2 us typical, and
   pulls its interrupt low. That line goes straight to the DSP's INT0.
5. The interrupt routine reads port 5. The read chip-selects the ADC again,
   with one wait-state.

The DSP can keep working during steps 3 and 4. The top module holds an
assertion that an ADC read never overlaps the sample phase.

## Speed, position and direction (S/P/D)

`spd_input` handles the quadrature encoder. The encoder lines go through
two-flip-flop synchronisers, and their edges are detected on `clk`.

- **Speed.** A 16-bit programmable divider (`prog_divider`) sets the time unit
  to (LOAD+1) x 40 ns, from 80 ns to 2.6 ms. A toggle flip-flop flips on every
  rise of A. While it is 1, a 16-bit timer counts time units. While it is 0,
  the timer is held at zero. When the toggle falls, the timer value is copied
  into the port 1 register. The result is that every other A period is
  measured, and the register always holds the most recent measurement.
  Software turns this time into a speed, for example with a lookup table. It
  should read the register twice and compare the two values.
- **Position.** A 12-bit counter counts up on every fall of A. It is cleared
  while the index is active. `index_active_high` gives the index polarity (a
  jumper on the board).
- **Direction.** B is latched on every rise of A. The bit is 0 when A leads
  and 1 when B leads.

## PWM

`pwm_output` uses an 8-bit programmable divider on the 25 MHz enable to step a
free-running 8-bit counter, PCNT, which forms a sawtooth. Each of the eight
channels outputs `PCNT < DATA`. A channel is therefore high at the start of
each period and low from PCNT = DATA onward:

```
f_pwm = 25 MHz / (256 * (LOAD + 1))       LOAD = 1: 48.8 kHz, 4: 19.5 kHz, 255: 381 Hz
duty  = DATA / 256                        0 .. 255/256
```

Channel registers are written in pairs and take effect immediately. A divider
load value of 0 must not be used. Here it would divide by one.

## Clocking and reset

- One clock domain. A toggle flip-flop (`clk_div2`) makes the 25 MHz
  reference as a clock enable, `ce25`, which drives the S/P/D and PWM dividers.
- `rst_n` is asynchronous and active low. On the board it comes from an RC
  power-on network. All registers reset to 0. The memory arrays are not reset.

## Where this RTL departs from the original board

- The board clocks several counters directly from the encoder lines, from
  CLKOUT1/CLKOUT2 and from port strobes. Here everything is synchronous to
  `clk` and uses enables and edge detection. As a result, encoder edges are
  seen two to three clocks late, and counter loads happen on clock edges, not
  asynchronously.
- The tri-state data bus is a read multiplexer (`read_data_mux`) plus a
  separate write-data input.
- The schematics of the wait-state generator, the memory control and the
  digital I/O were not available. Those blocks are built from their described
  behaviour: zero, one, two or five wait-states; memory selects multiplexed by
  XF; input latches that hold while they are read.
- The S/P/D toggle flip-flop is described as negative-edge triggered, but the
  measured interval is described as rise-to-rise of A. This RTL toggles on rises
  of A, reading the negative edge as the inverting Schmitt-trigger buffers in
  front of it.
- The timer wraps at 2^16 without saturating. Channel registers take effect
  mid-period. Unused read bits are 0.

## Files

- `rtl/motor_ctrl_pkg.sv`: port map, wait-state counts, shared types
- `rtl/dsp_motor_controller.sv`: top module
- `rtl/io_decoder.sv`, `rtl/wait_state_gen.sv`, `rtl/uart_interface.sv`, `rtl/read_data_mux.sv`: bus side
- `rtl/memory_select.sv`, `rtl/eprom.sv`, `rtl/sram_bank.sv`: memory
- `rtl/adc_control.sv`, `rtl/spd_input.sv`, `rtl/prog_divider.sv`, `rtl/sync2.sv`, `rtl/pwm_output.sv`, `rtl/digital_io.sv`, `rtl/clk_div2.sv`: peripherals
- `tb/tb_<module>.sv`: a self-checking testbench for each module
- `tb/adc1061_model.sv`: behavioural model of the ADC chip, used by the top-level test
- `tb/tb_eprom_test.hex`: five words for the EPROM test
- `tb/tb_dsp_motor_controller.sv`: end-to-end test at default parameters. A bus
  model plays the DSP and walks through what the control software does:
  loading and switching the memory map, four ADC conversions, PWM at
  48.8 kHz and 19.5 kHz, encoder speed, position and direction, digital I/O, and
  UART accesses. It checks data, wait-state counts and timing, and counts every
  mechanism it sees.
- `tb/tb_srm_drive_loops.sv`: workload test for a four-phase switched
  reluctance motor with an 8-bit absolute encoder. The encoder's least
  significant bit drives line A. A first-order current model stands in for
  each phase winding. The bus model runs a torque loop: read the position,
  look up the phase, convert its current, apply
  `d = K1 (i_des - i_act) + K2`, write the PWM, and poll the UART. The test
  checks that the loop's I/O takes 3.2 us, under the 8 us loop budget. It
  checks that the current stays within 5 % of the command when the supply
  rises by 60 %, and that the phases are sequenced as the rotor turns. It also
  checks that speeds of +-500 and +-1000 rpm are measured within 4 % from the
  rise-to-rise time, with the sign taken from the change of position.
- `tb/tb_serial_loader.sv`: workload test for the start-up download. Running
  from the EPROM, the bus model sets up the UART for 38.4 kBaud. It then polls
  for the host's commands: `'A' addr_hi addr_lo count` followed by the words,
  high byte first, or `'G'`. It stores each word in SRAM1 through an upper
  copy of its addresses. On `'G'` it clears XF and fetches the words back
  from program space. The test checks every word and every wait-state count.
  It also checks that the loader keeps up with the line, that the UART
  interrupt reaches INT1 once enabled, and that transmit writes arrive.
- `tb/uart16550_model.sv`: behavioural model of the UART's register side
  (receive FIFO, line status, divisor latch, interrupt enable), with a host
  task that delivers one character per 10 bit times.

## Simulating

From the repository root (the EPROM test reads its hex file by a path relative
to it):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/motor_ctrl_pkg.sv tb/tb_dsp_motor_controller.sv --top-module tb_dsp_motor_controller
./obj_dir/Vtb_dsp_motor_controller
```

Put any other `tb_<module>` in place of the top-level test. Each testbench
prints `TB_RESULT checks=N failures=M` and stops on its own. A watchdog stops
it if it hangs. Every testbench passes, and the full-size top-level test runs
in well under a second. Each testbench was also run against a deliberately
broken copy of its module, and each one failed as it should.

For lint, run `verilator --lint-only -Wall -Irtl -y rtl rtl/motor_ctrl_pkg.sv
rtl/<module>.sv`. The remaining warnings are for unused package constants and
unused outputs.
