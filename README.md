# MEGADISCAP pulsed current source: controller FPGA

The MEGADISCAP converter feeds trapezoidal current pulses into an inductive
magnet load: a 1 ms rise, a regulated flat-top of a few milliseconds, and a
fast fall. These are septum-type magnets, for injection from Linac 4. It does
this with three stages that work in turn:

* **High-voltage stage** (capacitor C1, switches S1 and S2). During the rise,
  S1 and S2 close and the full C1 voltage ramps the current up. During the
  fall, S2 opens and the magnet energy flows back into C1 through diodes.
* **I1 generator** (capacitor C2, switch S4, inductor L1). During the
  flat-top it carries the mean load current. It switches at no more than
  10 kHz, so its current I1 has a large triangular ripple.
* **Active filter** (a full bridge with inductor LF, current IF). Switch S3
  connects it in parallel with a capacitor C across the load during the
  flat-top. It switches at up to 100 kHz. Its job is to cancel the I1 ripple,
  damp the resonance of C with the load, and correct the load current.

Both generators are *hysteresis* current controls. Each has a twist: a
timer that stops it from switching faster than its rated frequency. The
load-current regulator Gc runs on a DSP at 200 kHz. Everything else is done
in one FPGA clocked at 40 MHz, and that FPGA is what this repository contains:

* the pulse sequencer;
* both hysteresis controls;
* the active-filter reference;
* the drivers of five ADCs and two test DACs;
* the serial link to the DSP.

## Structure

```
            FOREWARNING, START (control CPU)
                     |
                     v
  +-----------------------------+     BEGIN/END_DSP_CALC, ACTIVE_REGULATION
  | pulse_control               |<--------------------------------------------> DSP
  |  states I..V, pulse timer   |     DATA_SELECT[2:0], SPI_STE/CLOCK/SIMO/SOMI
  +--+-------------+------------+
     | S1,S2,S3    | S4_ENABLE, BRIDGE_ENABLE      spi_dsp_control <-> spi_dsp_sender (IL, Vc)
     v             v                                      |
   power      hysteresis_control (I1) --> S4              +--> spi_dsp_receptor (8 parameters)
   stage      hysteresis_control (IF) --> bridge +/-              |
                   ^ reference_if                                 |
              if_reference <---------- Regulation_Result, Damping_Coeff, I_Reference
                   ^
   adc_parallel (IF, 2 Msps)   adc_serial x4 (I1, IL, Vc, spare, 1 Msps)   dac_serial x2 (test)
```

| module | role |
|---|---|
| `megadiscap_fpga` | top: wiring, rate strobes, input synchronizers |
| `pulse_control` | pulse state machine, switch commands, DSP handshake, pulse timer |
| `hysteresis_control` | hysteresis comparator with per-edge minimum-period timers (two instances) |
| `if_reference` | `REF_IF = Regulation_Result - Vc*Damping_Coeff + (I_Reference - I1)` |
| `spi_dsp_control` | SPI master: two 16-bit words each way per exchange |
| `spi_dsp_receptor` | stores received words by DATA_SELECT |
| `spi_dsp_sender` | freezes IL and Vc at the start of an exchange and sends them |
| `adc_parallel` | AD7621 in parallel byte mode |
| `adc_serial` | four AD7621 in serial mode, read together |
| `dac_serial` | two AD5641 test DACs |
| `tick_gen`, `sync_2ff` | rate strobes; two-flop synchronizer |
| `megadiscap_pkg` | sample type, DATA_SELECT codes, parameter struct, state enum |

The rates, all derived from the 40 MHz clock:

| what | period (clocks) | rate | used by the interface |
|---|---|---|---|
| IF acquisition (parallel ADC) | 20 | 2 Msps | 20 clocks |
| I1, IL, Vc acquisition (serial ADCs) | 40 | 1 Msps | 35 clocks |
| test DAC update | 40 | 1 Msps | at most 36 clocks |
| DSP exchange | 200 | 200 kHz | 70 clocks |

Samples are never rescaled. Every value is a 16-bit two's-complement ADC code,
in which 0x7FFF is positive full scale and 0x8000 negative full scale. On the
unipolar channels 0 V reads close to 0x8000 (about -32063). The DSP must send
references and bands in the same codes.

## One pulse, step by step

`pulse_control` moves through five states. Its outputs are registered, so a
switch command never glitches.

| state | S1 | S2 | S3 | S4_ENABLE | BRIDGE_ENABLE | ACTIVE_REGULATION | leaves when |
|---|---|---|---|---|---|---|---|
| I standby | 0 | 0 | 0 | 0 | 0 | 0 | FOREWARNING |
| II preparation | 0 | 0 | 0 | 0 | 0 | 0 | parameters loaded, then START |
| III rise | 1 | 1 | 0 | 0 | 0 | 0 | IL sample >= I_Reference, or timer expired |
| IV flat-top | 0 | 1 | 1 | 1 | 1 | 1 | pulse timer expired |
| V fall | 0 | 0 | 0 | 0 | 0 | 0 | IL sample <= `I_ZERO_CODE` |

**Preparation** is a dialogue with the DSP:

1. FOREWARNING raises BEGIN_DSP_CALC.
2. The DSP computes the pulse coefficients, then raises END_DSP_CALC.
3. The FPGA drops BEGIN_DSP_CALC. The DSP then drops END_DSP_CALC.
4. The FPGA reads the parameters, one pair per DSP exchange. DATA_SELECT
   steps through the pairs 01, 10 and 11, then returns to 00.

A pair only advances when an exchange *made under that pair* has finished,
so a pair never changes in the middle of an exchange. START is ignored until
all three pairs have been read. FOREWARNING is ignored outside standby.

**The DSP link** exchanges two 16-bit words each way, every 5 µs. The 3-bit
DATA_SELECT seen by the DSP is `{pair, word}`. The pair comes from the
sequencer, and the word index is DATA_SELECT(0), which toggles between the
two words.

| DATA_SELECT | DSP → FPGA | FPGA → DSP |
|---|---|---|
| 000 | Regulation_Result (Gc output) | load current IL |
| 001 | Damping_Coeff (Q0.15) | capacitor voltage Vc |
| 010 | I_Reference | IL |
| 011 | Time_Pulse (µs) | Vc |
| 100 / 101 | IF band upper / lower offset | IL / Vc |
| 110 / 111 | I1 band upper / lower offset | IL / Vc |

Outside preparation the pair stays at 00. The DSP then sends its regulator
output and the damping coefficient in every exchange, and receives IL and Vc.
Both samples are frozen at the start of the exchange, so they come from the
same instant. The DSP link is an SPI of the FPGA's making:

* the FPGA is master and SPI_STE frames the 32 bits;
* SPI_CLOCK runs at 20 MHz, idles low, and only toggles inside a frame;
* both sides shift out MSB first;
* the FPGA changes SIMO and reads SOMI when the clock falls;
* the DSP reads SIMO when the clock rises and changes SOMI when it falls.

**The pulse timer** is loaded with Time_Pulse when START arrives. It counts
in 1 µs steps (`TICK_CYCLES` = 40 clocks) through the rise and the
flat-top. S2 stays closed for exactly `Time_Pulse × 40 + 1` clocks.

If the current reaches I_Reference first, the flat-top starts:

* S1 opens and S3 closes;
* both hysteresis controls are enabled;
* ACTIVE_REGULATION tells the DSP to run its controller.

If the timer expires first, the pulse falls straight from the rise state.
In that case S3 never closes.

**The fall** opens every switch. The state is held until the load-current
sample has decayed to `I_ZERO_CODE` (about 0.01 V on a unipolar channel), so
a new FOREWARNING cannot start while the magnet still carries current.

## Hysteresis control with a frequency limit

A plain hysteresis control flips its output whenever the current leaves the
band:

* off at or above `ref + band_hi`;
* on at or below `ref + band_lo`.

Its switching frequency then depends on the supply voltages and on how
fast the reference moves. If parameters drift it can exceed what the
switches tolerate. `hysteresis_control` therefore gives each band edge its
own timer:

* when the upper edge causes a commutation, the upper timer is loaded with
  one minimum switching period (`MIN_PERIOD` clocks);
* if the current reaches the upper edge again while that timer still runs,
  the commutation is held back (`limited` is high);
* the held-back commutation happens on the clock the timer expires, and the
  current overshoots the band meanwhile;
* the lower edge works the same way with its own timer.

In normal operation both timers have run out long before the current comes
back to the same edge, and the block is a plain hysteresis comparator.

| instance | reference | measurement | band | minimum period | drives |
|---|---|---|---|---|---|
| I1 | I_Reference | I1 (1 Msps) | I1 band | 4000 clocks (10 kHz) | `s4_gate` |
| IF | `reference_if` | IF (2 Msps) | IF band | 400 clocks (100 kHz) | `bridge_pos`, `bridge_neg` |

While a control is disabled (the rise, the fall, standby), its outputs are
off, its timers are cleared, and its internal state follows the sign of the
error. Enabling it therefore needs no initial conditions: it starts by
pushing the current toward the reference. The two bridge outputs are the
state and its complement, and they are never high together. Dead times
belong to the gate drivers and are not generated here.

## The active-filter reference

`if_reference` adds three loops into one reference, once per clock with one
clock of latency:

* `Regulation_Result`: the DSP's load-current regulator (outer loop).
* `- Vc × Damping_Coeff`: feedback of the capacitor voltage. This damps
  the resonance of C with the load. The coefficient is a signed Q0.15
  fraction, and the product is shifted right by 15 (rounding toward minus
  infinity).
* `+ (I_Reference - I1)`: feed-forward of the known I1 ripple, so the filter
  cancels it instead of waiting for it to show in the load current.

The sum is formed at 20 bits and saturated to 16.

## Converter interfaces

* **Parallel ADC (IF)**: `start_n` low starts an acquisition.
  1. CONVERT_START is pulled low for 2 clocks.
  2. The converter gets 18 clocks (450 ns) to convert.
  3. CHIP_SELECT goes low for two reads of the 8-bit bus: the upper byte with
     BYTE_SWAP low, then the lower byte with BYTE_SWAP high.

  The next request is accepted during the last read, which gives a 20-clock
  period (2 Msps).
* **Serial ADCs**: the same sequence, then 16 SERIAL_CLOCK pulses at the full
  40 MHz.
  * SERIAL_CLOCK is the board clock gated by an enable that changes on the
    falling edge, so it cannot glitch.
  * The converters move to the next bit on a rising SERIAL_CLOCK edge. The
    FPGA reads each bit on the *next* rising edge, which leaves a whole
    period for board delays.
  * The four words are valid 35 clocks after the request.
* **Test DACs**: a free-running 20 MHz CLOCK and a shared SYNC.
  * Each frame is `0 0 D13..D0`. The bits change on rising CLOCK edges, and
    the DAC takes them on falling ones.
  * DAC 0 shows the IF reference and DAC 1 the load current. Each shows the
    top 14 bits in offset binary.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it establishes |
|---|---|
| `tb_hysteresis_control` | cycle-exact match with an independent model of the band and per-edge timer rules; no limitation at slow slopes; limitation, overshoot and the rate ceiling at steep slopes |
| `tb_if_reference` | 500+ random and corner vectors against integer arithmetic, both saturations, latency |
| `tb_pulse_control` | switch pattern of every state, handshake order, DATA_SELECT stepping and a stale exchange, pulse timer to the clock, rise timeout |
| `tb_adc_parallel`, `tb_adc_serial` | words read back from converter models, 450 ns conversion respected, 16 clock pulses, 2 Msps / 1 Msps periods |
| `tb_dac_serial` | frame format, 20 MHz clock, one frame per 1 Msps request |
| `tb_spi_dsp_control` | words both ways against a DSP slave model (`dsp_spi_slave`), DATA_SELECT at the frame start and between words, 32 clocks, fits in 200 clocks |
| `tb_spi_dsp_receptor`, `tb_spi_dsp_sender` | register map; samples frozen per exchange |
| `tb_megadiscap_fpga` | whole FPGA at its default parameters (see below) |

The system test surrounds the FPGA with behavioural models:

* converter models for all seven converters;
* a DSP model, which does the handshake and closes the load-current loop
  with an integral controller in place of the real Gc;
* a first-order model of the power stage.

It runs three pulses:

1. **A complete pulse.** The rise takes 0.8 ms and the flat-top 2 ms, with
   normal switching. The load current stays within 1 % of the reference
   over the second half of the flat-top (0.4 % was observed). S2 stays closed for 2800 µs plus
   synchronizer delay.
2. **Narrow bands.** Both limiters engage. No I1 or IF switching period is
   shorter than 100 µs or 10 µs.
3. **A Time_Pulse shorter than the rise.** The pulse falls without ever
   closing S3.

Every mechanism is counted, and one that never happens is a failure:

* the handshake, each parameter pair and the rise, flat-top and fall states;
* the rise timeout;
* S4 and bridge commutations, and both limiters;
* ADC, DAC and DSP frames.

The whole run takes well under a second.

To simulate with Verilator 5, for example the system test:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb rtl/megadiscap_pkg.sv tb/tb_megadiscap_fpga.sv --top tb_megadiscap_fpga
./obj_dir/Vtb_megadiscap_fpga
```

Any other testbench is built the same way with its own name. The RTL uses
immediate assertions for its safety rules:

* S1 and S3 are never closed together;
* S1 and S3 only conduct with S2 closed;
* SPI_CLOCK only toggles inside a frame;
* the two bridge outputs are never both on.

## How far to trust it, and where it is this design's own

The following come from the original description of the controller:

* the block split and the rates;
* the five states and the switch pattern of each;
* the handshake order and the DATA_SELECT register map;
* the reference equation;
* the frequency-limiting rule;
* the converter frame formats.

The source gives these only as signal names or prose, so they are choices
made here:

* **Units and formats**: Time_Pulse in µs on 16 bits (up to 65 ms), and the
  damping coefficient in Q0.15.
* **Hysteresis bands** are signed offsets from the reference, not absolute
  levels.
* **Ending the rise and the fall**: the IL sample is compared against
  I_Reference, and the fall ends at a decay threshold.
* **Data choices**: the serial ADC channel order (I1, IL, Vc, spare), the
  DAC test signals, and freezing the samples for each exchange.
* **SPI** clock phase, and the length of the CONVERT_START pulse.
* **Robustness**: the input synchronizers and the two-clock-per-bit DSP SPI.
* **DSP words**: the even FPGA-to-DSP words are taken to be the load current,
  which the DSP regulator needs.

Not implemented here:

* the DSP program (the discrete Gc controller and the coefficient
  calculation);
* the control CPU, the converters themselves and the power stage.

These are off-chip or software and exist only as testbench models. In this
system the damping and control gains come from the DSP. Flat-top precision
(0.05 % in the specification) depends on the analog stage and the sensors,
and the models here cannot demonstrate it.

Lint notes: Verilator reports `rst_n` as used both synchronously and
asynchronously. This is because the immediate assertions are gated by reset;
the logic itself uses asynchronous reset only. A few status outputs of the
blocks (`commutation`, `valid`, `busy`) are left unused by the top. They stay
in the blocks as observation points.
