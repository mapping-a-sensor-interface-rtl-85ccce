# ESP node: a sensor interface and an ASK software radio in one FPGA

This is a wireless temperature-sensor node where the sensor bus, the radio's signal
processing and the control all sit in one FPGA. The only parts outside it are the
converters, the RF front end and the sensor. One node reads an I2C temperature sensor
every 2 seconds. It sends the top 8 bits of the reading by amplitude-shift keying (ASK),
that is by switching a 10.7 MHz IF carrier on and off, and an external RF front end moves
that carrier to 900 MHz. A second node receives the carrier, digitises the IF and
recovers the bits with a non-coherent receiver. It checks a sync pattern, decodes the
byte and switches an LED on or off against a temperature threshold.

The RTL here is one node, `esp_top`. A `role_rx` input decides whether it is the sensor
transmitter (0) or the receiver (1). Both datapaths are always present. The original
prototype ran its control on a soft processor. Here that control is done by three small
hardware controllers (`sensor_sampler`, `ask_frame_encoder` and `ask_frame_decoder`), so
the node works without any software.

```
                 +------------------------- esp_top --------------------------+
 I2C bus  <----> | i2c_master <-- sensor_sampler <-- sample timer (2 s)         |
 (sensor,        |                      | temp                                  |
  RF control)    |                      v                                       |
                 |              ask_frame_encoder --carrier_on--> ask_dds ------|--> DAC (14 b)
                 |                      ^                                       |
                 |                 sub-bit timer (375 us)                       |
                 |                      v                                       |
 ADC (14 b) ---->| ask_receiver: mix -> /50 -> |x| -> FIR(50) -> threshold -----|--> rx_bit
                 |                                                 |            |
                 |                              ask_frame_decoder <-+           |--> led, rx_temp
                 +--------------------------------------------------------------+
```

## The line code: sub-bits, bits and the sync word

This part matters most when reading the code. Everything is timed in **sub-bits** of
375 us, which is 9375 clocks at 25 MHz. Each sub-bit is either carrier-on (1) or
carrier-off (0).

* A data **bit** is six sub-bits (2.25 ms). Both codes begin with carrier-off and end
  with carrier-on, so a receiver can tell a transmitted '0' from a transmitter that is
  switched off:
  * `'0'` = off on on off on on (`6'b011011`)
  * `'1'` = off off on off off on (`6'b001001`)
* A **frame** is the 13-sub-bit sync word `on off on on off off on off on on off off on`
  (`13'b1011001011001`, 4.875 ms), followed by the 8 data bits, most significant first.
  That makes 61 sub-bits, or 22.875 ms.

In `esp_pkg` the codes are written with the first sub-bit in time as the most significant
bit. `esp_pkg::ask_frame()` builds the whole 61-bit frame. The encoder shifts the frame
out one sub-bit per timer tick.

The receiver has no clock recovery. The decoder waits for a rising edge of the received
bit, which is the start of the first sync sub-bit. It then loads the sub-bit timer so
that its ticks land in the middle of each sub-bit: half a sub-bit after the edge, then
every 9375 clocks. The frame is only checked after all 61 samples are taken:

* If the sync word does not match, `rx_sync_err` pulses.
* If any data group is neither code, `rx_code_err` pulses.
* Otherwise `rx_temp` and `rx_valid` update, and `led` is set when the byte, read as a
  signed temperature in degrees, is at least `LED_THRESHOLD`.

The receiver delays rising and falling edges by about the same 51 us (see below), so
the delay does not move the sampling points relative to the sub-bits. Sampling at
mid-sub-bit leaves half a sub-bit (4687 clocks, 187 us) of margin for edge jitter. The
timer runs free for the whole frame, so the two nodes' clocks may differ by up to about
0.8% (4687 / 571,875) before the last sample slips.

A false trigger, such as a burst of noise, keeps the decoder busy for one frame length.
A real frame that starts during that time is lost.

## Transmitter (`ask_dds`)

This is a direct digital synthesizer. A 32-bit phase accumulator advances by
`FTW = round(10.7/25 * 2^32) = 1838246003` every clock. Its top 10 bits address a sine
table with 1024 entries and 14-bit amplitude (`sine_rom`), which is computed at
elaboration with `$sin`, so no data file is needed. `enable` (carrier on) gates the
output to zero; the accumulator keeps running. The output reaches the DAC two clocks
after `enable`.

## Receiver (`ask_receiver`)

The five stages run at the rates and in the order of the original receiver. Signal
levels are for a carrier of amplitude A at the ADC.

| stage | module | rate | what it does | level with carrier on |
|---|---|---|---|---|
| downconverter | `rx_downconverter` | 25 MS/s | x cos(10.65 MHz NCO), scaled by 2^-13 | A/2 at 50 kHz, plus a sum product |
| decimator | `rx_decimator` | 25 -> 0.5 MS/s | boxcar mean of 50 samples | A/2 sinusoid at 50 kHz |
| envelope | `rx_envelope` | 500 kS/s | absolute value, saturating | rectified, mean (2/pi)(A/2) |
| lowpass | `rx_lowpass_fir` | 500 kS/s | order-50 equiripple FIR, DC gain 32733/32768 | about 0.318 A, steady |
| decision | `rx_bit_decision` | 500 kS/s | `rx_bit = level > threshold` | 1 |

* The local oscillator is 10.65 MHz, so the 10.7 MHz carrier lands at 50 kHz. The other
  mixer product folds to 3.65 MHz, and the 50-sample boxcar suppresses it.
* The FIR coefficients (26 unique taps of a symmetric 51-tap filter, in `esp_pkg`) come
  from a Parks-McClellan design:
  * sample rate 500 kHz
  * passband 0-10 kHz, stopband 50-250 kHz, stopband weighted 10 to 1
  * coefficients rounded to Q15
  * about -0.01 dB at 10 kHz and about -80 dB at 100 kHz, the main ripple frequency of
    the rectified 50 kHz tone
* The filter is fully parallel: it pre-adds the 25 symmetric pairs, multiplies them and
  the centre tap, and gives one output per input sample.
* The threshold is the `rx_threshold` input (18-bit signed). With A = 4000, the test
  measures a steady level of 1267 with the carrier on and 0 with it off, so 600 is a
  comfortable setting there. Scale the threshold with the expected signal level.
* Latency from a carrier edge to `rx_bit` is about 1280 clocks (51 us). Most of it is the
  filter's 25-sample group delay plus one decimation block.

`mix_out`, `dec_out`, `env_out` and `lpf_out` are brought out of `ask_receiver` for
observation. `esp_top` exports the filter output as `rx_level`.

## Sensor and control bus

`i2c_master` is a byte-level master for 7-bit addressing at 100 kHz. Its commands are
START (which also serves as a repeated START), WRITE (with an ACK check), READ (answered
with ACK or NACK) and STOP. A bit takes four quarters of 62 clocks, which gives 100.8 kHz
at 25 MHz. The pins are open-drain: `*_oe = 1` pulls the line low, and the pull-ups are
external. The master waits while a slave holds SCL low (clock stretching). An assertion
checks that SDA does not move while SCL is high inside a data bit.

`sensor_sampler` turns this into transactions:

* **After reset**, a DS1721 Start Convert: `S 0x90 0x51 P`.
* **On each sampling tick**, a temperature read: `S 0x90 0xAA Sr 0x91 [MSB] NACK P`.
  The read takes 9686 clocks (387 us). The byte goes to the encoder.
* **On `rfc_req`**, a two-byte control write to an RF front-end device:
  `S addr+W hi lo P`. `rfc_busy` is high from the request until the write is done.

If a slave NACKs, the transaction ends with STOP and `sensor_err` pulses. A receiver node
with no sensor fitted therefore reports one `sensor_err` after reset and then stays
quiet.

## Timers and roles

There are two `esp_timer`s, which are 32-bit down-counters with load and auto-reload.
The first tick comes `load_value+2` clocks after the load, and later ticks come every
`reload_value+1` clocks.

* The **sample timer** runs only in the transmitter role. It is reloaded while
  `role_rx = 1`, and started one full period (2 s) before the first reading after reset
  or after a switch to the transmitter role.
* The **sub-bit timer** belongs to the encoder in the transmitter role and to the decoder
  in the receiver role. The role input selects its load controls.

`role_rx` is meant to be tied off, but a change while running is handled safely:

* Leaving the transmitter role ends a frame in progress at once with the carrier off.
  The receiving node then reports a code error for the truncated frame.
* Leaving the receiver role abandons a frame being read.
* An assertion in `esp_top` checks that a node in the receiver role never keys its
  carrier.

## `esp_top` interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 25 MHz clock (also the ADC/DAC sample clock), async active-low reset |
| `role_rx` | in | 1 | 0 sensor transmitter, 1 receiver; meant to be static |
| `adc_data` | in | 14 s | IF samples, two's complement |
| `dac_data` | out | 14 s | IF samples, 0 while the carrier is off |
| `i2c_scl_i`, `i2c_sda_i` | in | 1 | bus levels |
| `i2c_scl_oe`, `i2c_sda_oe` | out | 1 | 1 = pull low |
| `rx_threshold` | in | 18 s | bit-decision threshold |
| `rfc_req`, `rfc_addr`, `rfc_data` | in | 1/7/16 | control write request: device address, two bytes |
| `rfc_busy`, `rfc_done` | out | 1 | request pending or running; one-clock end pulse |
| `tx_temp`, `tx_temp_valid`, `sensor_err` | out | 8/1/1 | last reading, its strobe, I2C NACK |
| `tx_busy`, `carrier_on` | out | 1 | frame in progress; DDS enable |
| `rx_bit`, `rx_level` | out | 1 / 18 s | recovered bit, lowpass output |
| `rx_temp`, `rx_valid`, `rx_sync_err`, `rx_code_err` | out | 8/1/1/1 | decoded byte and strobes |
| `led` | out | 1 | last decoded temperature >= `LED_THRESHOLD` |

Parameters and their defaults:

| parameter | default | note |
|---|---|---|
| `CLK_HZ` | 25,000,000 | system clock |
| `I2C_HZ` | 100,000 | bus rate |
| `SAMPLE_PERIOD_CYCLES` | 50,000,000 | 2 s |
| `SUB_BIT_CYCLES` | 9375 | 375 us |
| `DECIMATION` | 50 | receiver decimation factor |
| `SENSOR_ADDR` | 7'h48 | DS1721 with A2..A0 tied low |
| `LED_THRESHOLD` | 25 | degrees C, signed |

The carrier and LO tuning words are parameters of `ask_dds` and `rx_downconverter`. They
are derived for a 25 MHz clock, so change them together with `CLK_HZ`.

## Where this RTL goes beyond, or departs from, the original design

The following come from the original design:

* the ASK timing, sync word and bit codes
* the 10.7 MHz IF, the 25 MHz clock and the 50 kHz baseband
* the decimation factor of 50, the absolute-value envelope detector, the order-50
  equiripple lowpass and the threshold decision
* I2C at 100 kHz with 7-bit addresses
* two 32-bit timers
* one reading every 2 s, of the top 8 temperature bits

The following are this implementation's own choices:

* **No processor.** The soft processor, its 32 KB memory and its program are replaced by
  `sensor_sampler`, `ask_frame_encoder` and `ask_frame_decoder`. The role input stands in
  for the two firmware builds, one for the transmitting node and one for the receiving
  node. Control writes to the RF front end are made available as the `rfc_*` request
  port. The gain DAC, tuning DAC and digital I/O chip on the front end are not modelled;
  the two-byte write format is an assumption.
* **Sizes and methods the original does not fix:**
  * the DDS and NCO accumulator and table sizes
  * the 10.65 MHz LO, where low-side injection is a choice
  * a real mixer rather than a complex one
  * the boxcar decimation filter
  * the FIR band edges and coefficient width
  * 14-bit converter words
  * MSB-first bit order
  * sampling in the middle of each sub-bit
  * "equal to threshold" decided as '0', with no hysteresis
  * LED on at temperature >= 25 C
* **DS1721 commands:** Start Convert 0x51 and Read Temperature 0xAA, and the Start
  Convert after reset, follow that sensor's data sheet.
* **No clock-domain crossing.** The converters are assumed to be clocked from `clk`.
  Generating the converter clocks is done outside this RTL.

## Simulating

Every testbench in `tb/` checks its own results. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5, from the directory
that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -Irtl -y rtl -y tb rtl/esp_pkg.sv tb/tb_esp_top.sv --top-module tb_esp_top -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_ask_dds` | DDS output sample-exact against a reference sine, 10.7 MHz over 1 ms, zero when off |
| `tb_rx_downconverter` | mixer sample-exact; a 10.7 MHz tone gives a 50 kHz product of the expected amplitude |
| `tb_rx_decimator` | block means and a 50-clock output spacing |
| `tb_rx_envelope` | absolute value, saturation, hold |
| `tb_rx_lowpass_fir` | impulse response equals the coefficient list, DC gain, 100 kHz rejection, random inputs against a convolution |
| `tb_rx_bit_decision` | threshold compare |
| `tb_ask_receiver` | keyed 10.7 MHz bursts in, correct bit at every sub-bit, steady levels, edge delay |
| `tb_esp_timer` | first and periodic tick timing, enable, reload |
| `tb_i2c_master` | writes, repeated-START read, NACK, 248-clock SCL period, clock stretching |
| `tb_sensor_sampler` | Start Convert, reading in about 400 us, control writes, arbitration, absent sensor |
| `tb_ask_frame_encoder` | every sub-bit of several frames, 22.875 ms frame length, busy handling, cancel |
| `tb_ask_frame_decoder` | jittered frames; LED decisions; sync and code errors; disable, also in mid-frame |
| `tb_esp_top` | two nodes linked DAC to ADC, with the sampling interval shortened to 56 ms; five readings carried end to end; LED on, off, on, off; a false burst and a broken frame rejected; control writes and clock stretching on the bus; role switched mid-frame and back |
| `tb_esp_full` | two nodes with all defaults: readings at 2 s and 4 s (exactly 50,000,000 clocks apart), frames, decodes, LED on then off; about 100 M clocks, which took about 46 s in Verilator |

`i2c_device_model` in `tb/` is a behavioural I2C slave. It stands for the DS1721 sensor,
or for a control chip when placed at another address, and it can stretch the clock.
