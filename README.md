# AX.25 packet monitor in SystemVerilog

This design listens to amateur-radio packet traffic and shows what it hears. It takes
AX.25 frames sent as AFSK audio: Bell 202 tones at 1200 baud, with 1200 Hz and 2200 Hz for
the two bit values. It demodulates the audio, recovers the bits, finds the frame
boundaries and removes bit stuffing. Each frame is reported twice:

* on a serial port, as one text line with every address, the frame type and the remaining
  octets in hex, for example

      APRS  0 < OK1ABC7 VIA WIDE1 1,PUI F0 3E FF 21 7C 12 C5

* on a one-line character LCD, as destination and source: `QSL   0<SK9DEM0`.

The structure follows a student design for the FITkit board. In that board an MSP430
microcontroller ran the demodulator in software and a Spartan-3 FPGA decoded the
frames. Here all of it is synthesizable logic on one 7.3728 MHz clock. Only the audio
ADC, the USB-serial bridge and the LCD module stay outside.

```
 ADC ──► afsk_demod ──DATA/ENABLE──►┐
         (2 band-pass FIRs,          ├─mux─► ax25_decoder ─┬─► ax25_serial ─► TXD (text lines)
          rectify, low-pass,         │       filter        └─► ax25_lcd    ─► LCD bus
          compare)                   │       sampler
 ax25_bitgen (test frames) ─────────►┘       flag detector
                                             deserializer
```

## Demodulator (`afsk_demod`, `afsk_fir`, `afsk_strength`)

A timer pulses `adc_start` every 921 clocks, which gives 8005 samples per second. The
`run` input starts and stops the receiver. While it is low, no conversion starts and
DATA and ENABLE are held low. The
12-bit ADC result keeps its upper 8 bits. Subtracting 128 makes the sample a signed
byte.

Two 7-tap FIR band-pass filters run on every sample. They are symmetric equi-ripple
designs for 8 kHz sampling. Their coefficients are the real-valued designs scaled to
signed bytes with round(c·127):

| tap        | 0   | 1   | 2   | 3  | 4   | 5   | 6   |
|------------|-----|-----|-----|----|-----|-----|-----|
| 1200 Hz    | −20 | −10 | 20  | 38 | 20  | −10 | −20 |
| 2200 Hz    | 11  | −27 | −11 | 42 | −11 | −27 | 11  |

The sum of products is shifted right by 7 and saturated to a signed byte. Worked out
from the coefficients, each filter passes its own tone with a gain of about 0.83. It
lets through about a quarter of the other tone (−12 dB for the 1200 Hz filter at
2200 Hz, −14 dB for the 2200 Hz filter at 1200 Hz).

Each filter output is rectified and smoothed by `level = level/2 + |x|/2`. That is a
one-pole low-pass with a time constant of about 1.5 samples. Two comparators finish the
job:

* **DATA** is 1 when the 1200 Hz level is larger. The `negative` input swaps the tones.
* **ENABLE** is 1 while either level is above `ENABLE_TH` (default 8). ENABLE means
  "a signal is present". It arms the decoder, clears the LCD when it rises, and ends
  the current text line when it falls.

The smoothing is very light, so the levels ripple strongly. With a tone of 78 % of full
scale, the larger level dips to 15 inside a frame, although it averages about 50. That
is why the threshold is low. A threshold of 20 cut frames in half in simulation.

## Bit recovery (`ax25_decoder`)

All decoder blocks advance on one-cycle strobes from `ax25_clk_gen`. The generator
divides 7.3728 MHz by 768 to get 9.6 kHz (8 × 1200) and by 192 to get 38.4 kHz
(32 × 1200). It also outputs the two square waves.

**Filter** (`ax25_filter`). At 9.6 kHz DATA is shifted into a 5-bit window. The output
is 1 when at least three of the five samples are 1. This removes single-sample
glitches. It delays edges by about three samples.

**Sampler** (`ax25_sampler`) is the subtle part. A 5-bit counter steps once per
38.4 kHz strobe, so one bit lasts one full turn of the counter. The counter's MSB is
the bit clock. Bits are taken where it rises, at count 16, which is mid-bit when data
edges fall near count 0. When a data edge arrives while the counter is above 16, the
counter is running late. It then steps by 2 instead of 1. Each such edge pulls the
phase in by 1/32 bit, until the edges land at counts 0–16.

The rule only ever pulls the phase in, never pushes it out. If the first edges land at
counts 2–16 there is no correction, and the sampling point stays where it is: between
0 and 14/32 of a bit after the edge. With the demodulator's edge jitter (±4 counts at
8 kHz) a phase that samples only a few counts after the edge could read wrong bits.
In simulation the audio frames settled with edges at counts 0–9 and decoded without error. The jitter-free test-generator frame ran with its edges at count 13, 3/32 of a bit before the sampling point, and also decoded correctly.

The original design states this rule in its design chapter. Its implementation chapter
instead adds 2 on every edge, which would make the phase drift without bound. The
design chapter's version is used.

`bit_stb` is a one-cycle strobe where the bit clock rises. `bit_val` is the bit taken
then.

**Flag detector** (`ax25_flag`). The last eight bits sit in a shift register. When
they equal `01111110` (7E hex), FRAME goes high until the next bit and `frame_stb`
pulses. Both are registered, so they are valid one clock after `bit_stb`. With ENABLE
low the register is kept clear.

**Deserializer** (`ax25_deser`). It handles each bit one clock after `bit_stb`, when
FRAME for that same bit is already valid. The original shifted on the falling edge of
the bit clock for the same reason.

* A counter of consecutive ones decides whether a bit is kept. A bit that follows five
  or more ones is dropped. That removes the stuffed zero, and also the last two bits
  of a flag.
* Every other bit is shifted in LSB first. The eighth bit gives an octet and a
  `ready` strobe.
* FRAME resets the octet bit count. A frame's first octet therefore starts right
  after a flag.
* Nothing is produced until a flag has been seen while ENABLE is high.

Bits are used exactly as demodulated: a 1200 Hz tone is a 1 in positive mode. Standard
AX.25 radios use NRZI, where a 0 is a change of tone. That coding is not decoded here,
as in the original. Feed NRZI-decoded data, or add a decoder in front of the filter, to
monitor standard traffic. The FCS is not checked either. Its two octets print as hex
like the rest of the frame. AX.25 sends the FCS most significant bit first, but the
decoder cannot tell the FCS from data before the closing flag. It assembles those two
octets LSB first like all others, so they print bit-reversed.

## Frame reporting

### Serial text (`ax25_serial`, `uart_tx`, `sync_fifo`)

Octets and end-of-frame marks go into a 16-entry FIFO. A formatter takes one entry at a
time, builds at most eight characters, and sends them through an 8N1 transmitter. The
default rate is 115200 baud (`CLKS_PER_BIT` = 64). The formatter knows where it is in
the frame:

| part of the frame                           | text produced                                    |
|---------------------------------------------|--------------------------------------------------|
| call sign octets (address octets 1–6)       | `octet >> 1`, or `?` if not printable            |
| SSID octet (7th)                            | SSID (bits 4..1) as one hex digit                |
| start of source address                     | ` < `                                            |
| start of a repeater address                 | ` VIA `                                          |
| control octet                               | `,` then `p` if P/F (bit 4) is set, `P` if clear, then the type |
| every later octet (PID, info, FCS)          | ` xx`                                            |
| closing flag, or ENABLE lost mid-frame      | CR LF                                            |

The address field ends at the SSID octet with its low bit (L, "last address") set, or
after two repeaters. The type names come from the AX.25 control field:

* I frames (bit 0 = 0) print `I`.
* S frames print `RR`, `RNR`, `REJ` or `SREJ`.
* U frames print `SABME`, `SABM`, `DISC`, `DM`, `UA`, `FRMR`, `UI`, `XID` or `TEST`.
* Any other U value prints `?`.

Only one-octet control fields are handled. After a loss of signal the formatter is
locked until a flag arrives. At 1200 bit/s an octet arrives every 6.7 ms, and its text
takes at most 0.7 ms to send, so the FIFO stays nearly empty.

### LCD (`ax25_lcd`)

The first 14 octets after a flag fill a 15-character line: destination (6 characters
and SSID digit), `<`, source. The 14th octet triggers a rewrite. ENABLE rising queues a
clear. The bus follows HD44780 conventions and is write-only: RW is held low, and LD
is only driven.

* At power-up, after 20 ms, the controller sends 0x38, 0x0C, 0x06 and 0x01.
* A rewrite sends 0x80 and then the 15 characters.
* For each write, RS and LD are set one clock ahead. E is then high for 4 clocks, and
  the controller waits 50 µs (2 ms after a clear).
* A full rewrite takes 0.8 ms.

The original used a ready-made LCD component. These commands and timings are this
design's own, taken from the usual HD44780 values.

## Test bitstream generator (`ax25_bitgen`) and `test_mode`

The generator is loaded with up to 64 entries through `gen_wr`. Each entry is a flag
(`gen_flag`) or an octet. `gen_go` sends them at 1200 bit/s. Octets go out LSB first and
are bit-stuffed. Flags go out unstuffed. With `test_mode` high, the generator drives
DATA, and ENABLE follows `gen_busy`. This mirrors the original's microcontroller test
command, which sent canned frames to the decoder without a radio.

The original's operator commands all map onto inputs of the top:

| command                | input                                   |
|------------------------|-----------------------------------------|
| start, stop            | `run` high, low                         |
| positive, negative     | `negative` low, high                    |
| test frame             | `gen_wr`/`gen_flag`/`gen_octet`, `gen_go`, `test_mode` |
| reset                  | `rst`                                   |

## Timing summary

| item                                 | value at defaults                          |
|--------------------------------------|--------------------------------------------|
| system clock                         | 7.3728 MHz                                 |
| ADC conversion period                | 921 clocks (8005 Hz)                       |
| DATA/ENABLE after `adc_valid`        | 3 clocks                                   |
| filter / sampler strobes             | every 768 / 192 clocks                     |
| one bit                              | 6144 clocks                                |
| FRAME, `frame_stb` after `bit_stb`   | 1 clock                                    |
| octet `ready` after last `bit_stb`   | 2 clocks                                   |
| UART character                       | 640 clocks (115200 baud, 8N1)              |

## Where this departs from the original description

* There is one clock with enable strobes, not divided clocks and falling-edge
  registers. All resets are synchronous and active high. The original deserializer
  used an asynchronous reset.
* The demodulator is hardware, not microcontroller software.
* Several details are this design's own choices:
  * The ADC offset is removed by subtracting 128.
  * The FIR sum is divided by 128 and saturated.
  * `|−128|` is clamped to 127.
  * ENABLE compares each level with a threshold of 8. The original gives neither the
    form of this comparison nor the constant.
* The serial port's baud rate, and the exact spacing and CR LF of the text lines, are
  this design's choice. So is printing the SSID as a hex digit.
* The serial controller has no receive or RTS inputs. The original listed them but
  gave them no function.
* The 38.4 kHz clock follows the "32 × 1200" rate. One place in the original says
  64 × 1200.
* The generator's stuffing, its depth of 64 entries and its idle level of 0 are this
  design's choices.
* Not implemented: NRZI decoding and FCS checking. Neither appears in the original.

The same four-frame audio test was also run from ten random start phases. Every real
frame decoded correctly each time. In two of the ten runs an extra line of one or two
characters (for example `_w`) was printed near the start of a signal. The demodulator
had produced a false flag before the sampler was in phase. Nothing rejects such a
fragment, because there is no FCS or minimum-length check. A receiver that needs clean
output should drop lines shorter than a full address field.

## Files

| file                    | role                                                             |
|-------------------------|------------------------------------------------------------------|
| `rtl/ax25_monitor.sv`   | top: demodulator, generator, mux, decoder                        |
| `rtl/ax25_decoder.sv`   | decoder: clock generator, filter, sampler, flag, deserializer, UART and LCD controllers |
| `rtl/afsk_demod.sv`     | ADC timer, band-pass filters, signal levels, comparators          |
| `rtl/afsk_fir.sv`       | 7-tap FIR, coefficients as a parameter                           |
| `rtl/afsk_strength.sv`  | rectifier and `level/2 + x/2` low-pass                           |
| `rtl/ax25_clk_gen.sv`   | 9.6 kHz and 38.4 kHz dividers and strobes                        |
| `rtl/ax25_filter.sv`    | majority-of-five filter                                          |
| `rtl/ax25_sampler.sv`   | bit clock recovery                                               |
| `rtl/ax25_flag.sv`      | flag detector                                                    |
| `rtl/ax25_deser.sv`     | deserializer with destuffing                                     |
| `rtl/ax25_serial.sv`    | frame-to-text formatter; uses `sync_fifo.sv`, `uart_tx.sv`       |
| `rtl/ax25_lcd.sv`       | LCD front end and HD44780 bus driver                             |
| `rtl/ax25_bitgen.sv`    | test bitstream generator                                         |
| `rtl/ax25_pkg.sv`       | flag constant, character helpers, control-field acronyms         |

Each module has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

* `tb/tb_ax25_monitor.sv` runs the whole monitor with all defaults, taking about 8
  seconds. It plays four AFSK audio frames through a sine-wave ADC model: positive
  mode, negative mode, and one frame cut off mid-way. It also sends one frame through
  the test generator. It checks every octet, the exact text and the LCD contents. It
  also counts signal detection, flags, destuffing, sampler corrections, glitch removal,
  LCD clears, lines ended by signal loss, negative mode, test mode and a stop and
  restart of the receiver.
* `tb/tb_ax25_decoder.sv` runs the decoder at full size. Its bit stream has injected
  glitches.
* `tb/tb_ax25_maxframe.sv` sends the longest frame: four addresses, control, PID, a
  256-octet information field and FCS, 288 octets in all. It checks the 823-character
  text line and that the formatter's FIFO never backs up. It takes about 10 seconds.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ax25_monitor \
    -Irtl -y rtl -y tb +libext+.sv rtl/ax25_pkg.sv tb/tb_ax25_monitor.sv
./obj_dir/Vtb_ax25_monitor
```

To run another testbench, put its name in place of `tb_ax25_monitor`. The package
must come first on the command line. Testbenches that shorten waits override
parameters on the module they test: `tb_ax25_serial` uses 8 clocks per UART bit,
`tb_ax25_lcd` shortens the LCD waits, and `tb_ax25_bitgen` uses 8 clocks per bit. The
parameters to change for another board are `CLK_HZ`, `BAUD`, `ADC_DIV`, `ENABLE_TH`
and `UART_CLKS_PER_BIT` on `ax25_monitor`.
