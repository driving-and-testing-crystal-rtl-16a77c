# A clock-wire-free digital link for crystal-free radio nodes

A radio node built without a crystal has only a noisy on-chip oscillator.
Two such nodes never run at quite the same frequency, and nothing but the
data passes between them. This RTL is the digital half of a test system
for that situation. One node frames a short message as a simplified
IEEE 802.15.4 packet and clocks it out as a plain bit stream, at 100 kbit/s.
That stream drives an MSK/BFSK modulator. At the other node, the
demodulated stream comes back in through a comparator or a 12-bit ADC.
The receiver recovers the bit clock from the data itself, finds the start
of the frame, uses the length in the header to know where the frame ends,
and checks the CRC.

The design has two halves:

* the **transceiver**, which builds frames on the transmit side and
  detects and stores them on the receive side;
* the **PCB Interface**, which sits between the transceiver and the FPGA
  pins. It generates the transmit bit clock, recovers the receive bit
  clock, handles the two receive paths (comparator or ADC), includes a
  test-pattern generator, and drives four configuration DACs over SPI.
  A processor programs it through an AHB-Lite register file.

`radio_node` is the top level and holds one of each. A link is two
`radio_node` instances, each with its own clock, with each node's `tx_pin`
wired to the other's receive inputs through the analog chain.

## Frame format

The frame is an IEEE 802.15.4 PPDU with the preamble removed and no chip
spreading. Bits go out LSB first in every field.

| field | bits | content |
|-------|------|---------|
| SFD   | 8    | `0xA7` |
| PHR   | 8    | PSDU length in octets (message + 2), bit 7 = 0 |
| PSDU  | 8·n  | the message, 1 to 125 octets |
| FCS   | 16   | CRC-16, x^16+x^12+x^5+1, initial value 0, reflected; low octet first |

The largest frame is 8 + 8 + 127·8 = 1032 bits. This sets the depth of the
transmit bit FIFO. A message of `n` octets occupies the line for
`(n+4)·8·CLK_DIV` system clocks.

Because there is no preamble, the receiver hunts continuously. It accepts
a frame only on an exact 8-bit SFD match. A single bit error in the SFD
loses the frame. A bit error anywhere else shows up as `crc_ok = 0`.

## Clock recovery: the part to understand first

`clk_recov` runs a counter with the same nominal period as the
transmitter's divider (`CLK_DIV` system clocks per bit). The sample clock
is high for the first half of each count and low for the second half. Its
rising edge is the sampling instant (`tick`).

A second counter measures how long the input has been high. When the
input has been high for `CLK_DIV/2` clocks, the rise is treated as a real
data edge, not a glitch, and the period counter restarts at zero. That
moment is half a bit after the edge, so the sample clock rises in the
middle of the bit. Falling edges and short high pulses do not move the
counter. Between rising edges the counter free-runs, so the sampling point
drifts by the frequency difference of the two nodes. With a relative
mismatch `e` and `k` bits between rising edges, the drift is `k·e` of a
bit. It must stay below half a bit. The benches use a 2 % mismatch.
The frame has no preamble and no chip spreading, so a message can hold
long runs of equal bits. A run of `k` bits without a rising edge
tolerates a mismatch of about `1/(2k)`. A worst-case frame of 1032 bits
with no rising edge at all would still tolerate about 480 ppm.

The restart fires mid-bit, and `tick` is the rising edge of the sample
clock level, not a separate pulse. So a restart can never produce two
samples in one bit, or skip one.

## The receive FIFO controller

With no clock wire, the receiver cannot tell that the transmitter has
stopped, because the recovered clock keeps ticking. `rx_fifo_ctrl` solves
this:

1. It forwards each sampled bit to the transceiver as a `wr` pulse.
2. It watches for the SFD itself, and reads the PHR that follows.
3. It forwards exactly PHR·8 more bits, then stops (`done`).
4. It re-arms only when the receiver input is disabled and enabled again
   (Control bit 2).

The transceiver's receiver (`rf_rx`) does its own exact SFD match on the
forwarded bits. It assembles the octets LSB first into a 127-octet FIFO,
runs the CRC over the whole PSDU (an intact frame leaves a zero
remainder), and then pulses `done` with `frame_len` and `crc_ok`.

## Receive paths

* **Comparator:** `rx_buf_comp` is a two-flop synchroniser.
* **ADC:** `rx_buf_adc` reads a 12-bit serial ADC continuously. The frame
  is chip select low, 16 serial clocks (four zeros, then 12 bits MSB
  first, data changing on the falling edge and sampled on the rising
  edge), then one idle clock. That is one sample every `34·SCLK_HALF`
  system clocks, about 7 per bit at the defaults.
  `rx_extract_adc` turns the samples into bits, with bit = 1 when the
  sample is above the threshold. The threshold is either the fixed value
  in register 0x14, or the running mean of the last `2^AVG_LOG2` samples
  (256 by default, about 35 bits). The mean comes from a circular buffer
  and a running sum. Until the window has filled, the partial sum is still
  divided by the full window size.
* `rx_mux` picks one of the two paths and forces 0 while the receiver
  input is disabled.

## Transmit side

* `tx_clk_gen` divides the system clock by `CLK_DIV` and produces one
  `tick` per bit.
* `tx_fifo_ctrl` pops one bit from the transceiver's bit FIFO per tick.
  The FIFO is popped only while the output is enabled and the bit stream
  is selected, so a queued frame waits while the pattern generator is on
  the pin.
* `tx_sig_gen` rotates through the 16-bit register 0x1c, LSB first, one
  bit per tick.
* `tx_out_buf` selects between the two sources and holds the pin low when
  disabled.

`rf_tx` builds the frame one bit per system clock into a 1032-bit FIFO.
The message octets arrive on a valid/ready stream, where a DMA engine
would attach.

## Registers (AHB-Lite, 32-bit, zero wait states)

| addr | name | bits |
|------|------|------|
| 0x00 | Control | 0 Tx output enable; 1 Tx source (0 bit stream, 1 signal generator); 2 Rx input enable; 3 Rx source (0 comparator, 1 ADC); 4 threshold (0 moving average, 1 fixed) |
| 0x04–0x10 | DAC0–DAC3 | 11:0 value; every write sends the value to that DAC |
| 0x14 | ADC threshold | 11:0 |
| 0x18 | ADC debug (read only) | 11:0 latest sample, 23:12 active threshold |
| 0x1c | Signal generator | 15:0 pattern |
| 0x20 | Version (read only) | `0x0000_5000` |

The four DACs set the two modulation frequencies (DAC0, DAC1), the
comparator threshold (DAC2) and the carrier (DAC3). `dac_ctrl` shares one
SPI clock and data line among them, with a frame-sync line per DAC. Each
word is 16 bits, `{4'b0000, value}`, sent MSB first, with data changing on
the rising edge. Pending writes go out in DAC order. A second write to a
DAC that is still waiting replaces the first.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `CLK_DIV` | 1000 | system clocks per bit: 100 kbit/s from a 100 MHz clock |
| `AVG_LOG2` | 8 | moving-average window, 2^n ADC samples |
| `ADC_SCLK_HALF` | 4 | ADC serial clock half period, in system clocks |
| `DAC_SCLK_HALF` | 4 | DAC serial clock half period |
| `VERSION` | 0x5000 | value of register 0x20 |

Shared constants and types are in `rtl/pcbif_pkg.sv`: register addresses,
control bits, the configuration struct, the SFD, the size limits, and one
CRC step.

## How closely this follows the original design, and where it departs

These parts follow the original design: the block split, the register map,
the simplified PPDU without preamble, the exact-match start detection, the
clock recovery rule (restart after the line has been high for half a
period), the receive FIFO controller that counts bits against the PHR, and
the 100 kbit/s rate.

These are choices of this implementation:

* the system clock frequency;
* the SFD value, the bit order and the CRC polynomial, all taken from
  IEEE 802.15.4;
* the ADC and DAC serial formats, modelled on common 12-bit SPI parts;
* the moving-average window length;
* the idle line levels;
* re-arming by toggling the enable bits;
* the valid/ready octet streams in place of a DMA;
* the `mode` input in place of the transceiver's own control registers.

The whole design runs on one clock. Sample clocks are enable strobes, not
derived clocks.

The design does not include the processor, its memories, the DMA, the bus
arbiter, the UART or the analog boards. It also leaves out the
transceiver's own bus registers, whose layout is not defined here; the
`mode`, `tx_start`/`tx_len` inputs and the `rx_done`/`rx_len`/`rx_crc_ok`
outputs carry the same information. The AHB-Lite slave port and the
octet streams are where the processor and DMA attach. The IEEE 802.15.4
rate of 250 kbit/s needs `CLK_DIV = 400`. The small end-to-end test runs at that setting.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends. For
example:

```
verilator --binary --timing -Irtl -Itb rtl/pcbif_pkg.sv tb/tb_radio_node.sv \
          --top-module tb_radio_node -Mdir obj_tb
./obj_tb/Vtb_radio_node
```

Add `--assert` to enable the FIFO overflow and underflow assertions.

* `tb_<block>` tests one block each. Several use reduced sizes, such as
  `CLK_DIV=40` with 2 % clock drift and glitches in `tb_clk_recov`.
  `tb_rf_tx` checks the CRC against the standard check value (`0x2189`
  for `"123456789"`).
  `tb_pcb_ctrl` also runs back-to-back pipelined bus transfers against a
  reference copy of the register file.
* `tb_pcb_interface` loops the pin back to the comparator and to an ADC
  model. It checks the bits recovered after the SFD, the frame timing,
  the 0x18 readback, the DAC traffic and the pattern generator.
* `tb_radio_node` uses `link_bench`: two nodes whose clocks differ by 2 %,
  with a channel that delays the line and adds glitches, and an ADC
  reading with a drifting offset and noise. It sends messages through the
  comparator, through the ADC with a fixed threshold and with a moving
  average, in both directions. It also sends one message with a corrupted
  bit, which must fail the CRC. It checks that a start in receive mode is
  ignored, and that the signal generator's pattern appears on the pin.
  Finally it sends six frames back to back, cycling through the three
  receive paths, and rewrites the carrier DAC in the middle of each frame.
  It counts each of these events and fails if any never happened. It runs
  at `CLK_DIV=400`.
* `tb_radio_node_full` runs the same sequence with `radio_node` at its
  default parameters. It sends one 125-octet message (the largest frame)
  and 30-octet messages elsewhere. It takes about twenty seconds.

`tb/adc_model.sv` and `tb/dac_model.sv` are simulation models of the
serial converters.
