# Infant breathing and apnea monitor: FPGA peripheral subsystem

An infant who stops breathing for 20 seconds or more is having an apnea
event. This design listens for breathing with a microphone. It extracts the
slow loudness envelope of the breath sounds and raises an alarm when too long
passes without a breath.

The work is split between a small soft processor and custom logic:

- **Processor software.** It runs an 8 kHz interrupt. Each interrupt reads one
  12-bit sample from an SPI ADC and hands it to the filter. Every 500
  interrupts (16 times a second) it reads the envelope back and looks for a
  peak (a breath). It counts envelope samples since the last breath, shows
  that count on eight LEDs, and sounds the alarm after 320 samples (20 s).
- **Custom logic.** A fixed-point envelope filter runs at the 8 kHz sample
  rate. Around it sit the peripherals the processor needs: the timer that
  makes the interrupt, three SPI masters, LED and switch ports, and an
  address decoder.

This repository holds the custom logic as synthesizable SystemVerilog. The
processor, its memory and the clock generator are not included. They connect
through the top module's bus port, interrupt line and clock inputs. The
testbenches model the processor software in SystemVerilog. This makes the
control sequence executable, and the tests use it as the reference.

## The envelope filter

This is the heart of the design: `envelope_filter` inside the `sound_filter`
peripheral. Per 8 kHz sample, it does the following:

1. **Band-limiting FIR** (`bandpass_fir`). This is an 11-tap symmetric FIR
   with coefficients 1856, 3960, 9506, 16448, 22113, 24286 (centre), 22113,
   …, 1856 in Q1.17.
   - Mirror taps are added first.
   - Each pre-add is cut back to 16 bits with wrap-around.
   - The six 16×16 products are summed into a 32-bit accumulator that also
     wraps.
   - The wrapping is deliberate. It reproduces the fixed-point model the
     coefficients came from, bit for bit. Keep the input amplitude modest (the
     ADC's 12 bits leave plenty of room).
2. **Decimation by 500** (`timing_controller` plus a hold register).
   - A counter of 0…499 produces three enables:
     - `enb`: every sample.
     - `enb_1`: the sample in which the counter is at 0. The FIR result is
       captured into the hold register.
     - `enb_0`: the sample after the counter reads 499. The moving average
       shifts.
   - In the capture sample, the decimator output shows the live FIR value. In
     every other sample it shows the held value.
3. **Rectifier.** The 32-bit value is made positive by 33-bit negation, cut
   back to 32 bits. Then bits [31:17] are kept as a signed 15-bit magnitude
   and sign-extended to 16 bits. The result is a coarse |x| scaled down by
   2^17. Note that the most negative input wraps to itself.
4. **Moving average** (`envelope_avg_fir`). This is a 30-tap FIR with every
   coefficient 17476 (≈ 1/30 in Q1.19). It uses 15 wrapping pre-adds and a
   32-bit wrapping sum. It only shifts on `enb_0`, so it averages the last 30
   decimated magnitudes: about 1.9 s of signal at 16 Hz.

The output `out1` is combinational from the state. It changes once per 500
samples, one sample after the counter wraps. Software samples it a few
interrupts into each 500-sample frame (the model uses interrupt 10), so it
never races the update.

### Filter input: the offset and the sample clock

The ADC only sees 0…3.3 V. The microphone signal is therefore lifted by an
analog level shifter, and the samples arrive as unsigned values around a DC
offset. The filter expects a bipolar signal. `sound_filter` therefore feeds
it `IN[15:0] − REF[15:0]`. Software writes REF once (1250 counts) and IN once
per interrupt.

The filter must step exactly once per 8 kHz sample. On the original board,
an 8 MHz clock was divided by 1000 and the result clocked the filter
directly. Here `filter_clk_div` still divides the 8 MHz `f_clk`: it toggles
`slow_clk` every 500 cycles. That clock is passed through a three-flop
synchroniser into the bus clock domain, and its rising edge becomes a
one-cycle `sample_en` strobe. The whole filter runs on the bus clock with
that strobe as its enable. This keeps the design single-clock apart from the
synchroniser. The sample strobe is independent of the processor's timer. The
filter takes whatever IN holds at the strobe.

## Peripheral bus and register map

The processor port is a simple same-cycle bus: `bus_req_t`
{valid, wr, addr[15:0], wdata[31:0], be[3:0]} and `bus_rsp_t` {ack, rdata}.
`periph_bus` decodes `addr[15:12]`. Addresses outside the seven windows are
acknowledged with zero data, so a stray access cannot hang the processor.

| window | block | registers (byte offsets) |
|---|---|---|
| 0x0xxx | LEDs (`gpio_port`) | 0x0 DATA, 0x4 TRI (1 = input; resets to all ones) |
| 0x1xxx | switches (`gpio_port`) | same |
| 0x2xxx | DAC channel A (`spi_master`) | see below |
| 0x3xxx | DAC channel B (`spi_master`) | see below |
| 0x4xxx | ADC (`spi_master`) | see below |
| 0x5xxx | sound filter | 0x0 IN, 0x4 OUT (envelope, read only), 0x8 REF |
| 0x6xxx | timer | 0x0 TCSR, 0x4 TLR, 0x8 TCR |

The SPI registers follow the layout of the vendor SPI core the software was
written for:

- 0x20 IPISR (bit 2 = transfer done, write 1 to clear)
- 0x60 SPICR (bit 1 enable, bit 2 master, bit 7 manual slave select, bit 8
  inhibit)
- 0x64 SPISR (bit 0 RX empty, bit 1 RX full, bit 2 TX empty, bit 3 TX full)
- 0x68 DTR
- 0x6C DRR
- 0x70 SSR

A transfer is one byte, MSB first, in SPI mode 0, at `clk/SCK_RATIO`.

The control words the software uses are:

- 0x194: inhibited, disabled.
- 0x196: inhibited, enabled.
- 0x096: run.

TX-empty is reported only once the shifter has finished, so "poll TX empty,
then read DRR" returns the received byte.

The timer counts down from TLR. With auto-reload, it spends one cycle
reloading, so its period is TLR + 2 cycles. Software programs
TLR = 66 666 700 / 8000 − 2 = 8331, then TCSR 0x20 (load) and 0xD2 (down,
auto reload, interrupt enable, run). It acknowledges each interrupt by
reading TCSR and writing the value back.

### The dual DAC on one port

The dual-channel DAC module has a single clock pin and a single sync pin, but
two data pins. Two SPI masters drive it. `da2_link` ORs their clocks, ANDs
their active-low selects and gives each master one data pin. The software
starts both masters one register write apart. The ORed clock is therefore
clean only while the skew between the two masters is shorter than half an
SPI clock period. At the default `SCK_RATIO` of 16 there are 8 cycles of
slack. Do not lower `SCK_RATIO` below about 8 without also tightening the
software.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `apnea_periph_top`, `envelope_filter`, `sound_filter`, `timing_controller` | `DECIM` | 500 | samples per envelope value (8 kHz → 16 Hz) |
| `apnea_periph_top`, `filter_clk_div` | `FDIV_HALF` / `HALF` | 500 | f_clk cycles per half sample period (8 MHz → 8 kHz) |
| `apnea_periph_top`, `spi_master` | `SCK_RATIO` | 16 | bus clocks per SPI clock (even) |
| `gpio_port` | `WIDTH` | 8 | pins |

The filter coefficients and register offsets are in `apnea_pkg`.

## The software side (as modelled in `tb/apnea_sw_model.sv`)

| constant | value |
|---|---|
| sample window | 16 envelope values |
| minimum peak level | 0xFFFFF |
| envelope sample taken at interrupt | 10 of every 500 |
| apnea limit | 320 envelope samples |
| level-shifter reference | 1250 counts |

- **Breath detection.** A breath is counted when the middle value of the
  window equals the window's maximum and is at least the minimum level.
- **LED bar.** The LEDs show `0xFF >> (8 − count/40)`, where count is the
  number of envelope samples since the last breath. The bar blinks once the
  sixth LED is lit.
- **Switches:**
  - Switch 8 silences and resets the count.
  - Switch 1 echoes the raw ADC sample to DAC channel A.
  - Switch 2 echoes the envelope, shifted right by the switch word
    divided by 4 (switches 3–8).
- **DAC channel B** always outputs the reference voltage.

The alarm itself and any user interface beyond the LEDs and switches are
software and are not modelled further.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_bandpass_fir`, `tb_envelope_avg_fir` | every output against a bit-exact model, random and full-scale inputs, enable gaps, mid-run reset |
| `tb_timing_controller` | enable pattern and period over several frames |
| `tb_envelope_filter` | whole chain at `DECIM`=10 against a model, including rectification of negative values |
| `tb_envelope_am` | envelope filter at decimation 500 on an amplitude-modulated 530 Hz sine: 16 Hz output, envelope follows the 0.25 Hz modulation |
| `tb_filter_clk_div` | one strobe per 1000 f_clk cycles at default size |
| `tb_sound_filter` | registers, byte enables, offset subtraction, envelope |
| `tb_interval_timer` | period TLR+2, load, one-shot, interrupt acknowledge |
| `tb_spi_master` | byte transfers against ADC/DAC device models, status flags, clock rate |
| `tb_gpio_port`, `tb_periph_bus`, `tb_da2_link` | read-back, decode, unmapped accesses, joined DAC port |
| `tb_apnea_periph_top` | end to end at reduced size (see below) |
| `tb_apnea_full` | end to end at default parameters |

The end-to-end test scales things down: decimation by 8, a filter sample
every 100 f_clk cycles, an 800-cycle timer period and an apnea limit of 64.
Its scenario:

- an amplitude-gated 250 Hz tone as breathing
- a pause long enough to raise the alarm
- the silence switch and both DAC echo modes
- breathing again

It counts interrupts, decimations, negative rectifier inputs, envelope
reads, detected breaths, apnea events, blinks, silences, echoes, DAC pairs
and ADC frames. It fails if any count is zero. The envelope read over the bus
is compared with an independent filter model fed at the same sample strobes.

`tb_apnea_full` uses the top with no parameter overrides:

- clocks of 66.67 MHz and 8 MHz
- 4000 interrupts, which give eight decimated envelope values
- every interrupt period checked to equal 8333 cycles

It takes about 40 s in Verilator.

To run a test:

```
verilator --binary --timing -Mdir obj rtl/apnea_pkg.sv rtl/*.sv \
  tb/ad1_model.sv tb/da2_model.sv tb/apnea_sw_model.sv \
  tb/tb_apnea_periph_top.sv --top-module tb_apnea_periph_top
./obj/Vtb_apnea_periph_top
```

`ad1_model` and `da2_model` are simple behavioural models of the ADC and DAC
modules. They are for testbenches only.

## Where this departs from the original system, and what to trust

- **Filter coefficients.** The band-limiting FIR is meant to pass the
  300–800 Hz band where breath sounds are strongest. Its coefficients are all
  positive, however, which is a low-pass shape. They are used exactly as they
  were in the working system; redesigning the filter would be a separate step.
- **Filter clocking.** The original clocked the filter from a divided clock
  and tolerated the timing warnings. Here the filter is clocked by the bus
  clock with a synchronised strobe. The sample sequence is the same, but
  resets are synchronous.
- **Bus and timer.** The processor's vendor bus and timer are replaced by a
  same-cycle bus and a timer that implements only the registers and bits the
  software uses. There is no capture mode, PWM or cascade.
- **Address map.** The base addresses are this design's own. Adjust
  `periph_bus` and `apnea_pkg` to match another memory map.
- **IN register half.** The filter takes the numerically low 16 bits of the
  IN register. The original register was described in descending bit order,
  where "bits 16 to 31" are the low half.
- **SPI core.** Only the registers and behaviour the software needs are
  implemented: byte transfers, mode 0, manual slave select and no FIFOs.
- **Tested signals.** The envelope filter's response was only checked
  against a bit-exact model and with synthetic tones. Real breath recordings
  were not simulated. The detection thresholds are software constants and
  would need calibration on real infants.
