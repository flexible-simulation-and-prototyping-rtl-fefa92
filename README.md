# Multi-standard RFID reader: FPGA signal processing in SystemVerilog

This RTL is the signal-processing core of a reconfigurable RFID reader. It sits between a DSP,
which runs the protocol stack, and the DAC/ADC of a simple analog front end. The idea behind
the architecture is that everything that depends on the air-interface standard lives in
reprogrammable parts. Coding, link timing, modulation depth, the carrier and the receive
decision are all run-time registers, so one board can speak the EPC HF draft, EPC Class-1
Gen-2 and ISO/IEC 15693. The front end (carrier suppression, envelope detector, UHF
converters) stays fixed and standard-agnostic.

The structure follows the reader architecture published in *Flexible Simulation and
Prototyping for RFID Designs* (an HF/UHF rapid-prototyping reader with a TI C6416 DSP, a
Virtex-II FPGA, 16-bit DACs, 14-bit ADCs and a common 40 MHz clock). That description
gives the blocks, their order and several numbers. How most blocks work inside is this
design's own; the sections below say which is which.

```
            DSP (protocol stack, not included)
              |  register bus + irq
        +-----v-------------------------------------------------------------+
        | dsp_if: parameter registers, TX bit FIFO, RX word FIFO, IRQ flags |
        +---+-------------------------------------------------------^-------+
            | bits                                                  | words
   TX       v                                             RX        |
   tx_control --> pie_encoder  --+                        rx_reg_ir (Reg, IR)
        |         ppm4_encoder --+--> tx_mux (CW / data)        ^
        |                                |                symbol_decoder (FM0 / Manchester)
        |                          ask_modulator                ^
        |                                |                sync_rx_ctrl (timing, start/end, timeout)
        |                           tx_filter                   ^
        |                                |                     slicer (> threshold)
        |                  NCO x  upconverter (13.56 MHz)       ^
        |                                |                moving_average (run-time length)
        +-- rx_arm --------------------->|---------------->     ^
                                         v                  rx_filter (order 8)
                                    DAC (16 bit)                ^
                                                           ADC (14 bit)
```

`rfid_reader_fpga` is the top. All of it runs in one 40 MHz clock domain with a synchronous,
active-low reset.

## Transmit path

**Frames.** The DSP writes a command bit by bit into the transmit FIFO (`REG_TXBIT`: bit 0
is the data, bit 1 marks the last bit of the frame). It then writes `REG_TXCMD`. The
`tx_control` state machine has three states: field off, continuous carrier (CW), and sending.
In CW it powers the tags with an unmodulated carrier. On a start command it switches the MUX
to the data encoder. When the encoder finishes it returns to CW, raises the *TX done* flag
and arms the receiver for the tag's reply. A start request while the field is off is ignored.
Dropping the carrier in mid-frame takes effect only after the frame.

**Pulse interval encoding (`pie_encoder`)** is used by the EPC standards. Every symbol is
carrier followed by a low pulse of width PW:

| symbol | length |
|---|---|
| delimiter (opens every frame) | DELIM, low throughout |
| data-0 | tari |
| data-1 | RTCal - tari |
| RTCal | RTCal |
| TRCal (preamble only) | TRCal |

A frame with preamble is delimiter, data-0, RTCal, TRCal, then the data. A frame-sync
opening omits TRCal. The defaults are the 8 us tari, 4 us pulse and 20 us RTCal/TRCal
setting measured on the HF board. In cycles that is 320/160/800/800, with a 500-cycle
(12.5 us) delimiter. The 25 us / 12 us / 75 us setting used with 15 % modulation fits
the same 16-bit registers. The symbol rules are those of EPC Gen-2.

**1 out of 4 (`ppm4_encoder`)** is the reader coding of ISO/IEC 15693. Each bit pair,
first bit least significant, becomes one 75.5 us symbol of eight 9.44 us slots (378 cycles
each). The carrier drops for one whole slot, at position 2*value+1. The start-of-frame and
end-of-frame slot patterns follow ISO/IEC 15693-2. The encoder fetches the two bits of the
next symbol during the last two cycles of the current one, so symbols follow without gaps.
`REG_CTRL[2]` selects which encoder runs; both read the same FIFO. If the FIFO runs dry
before a flagged last bit, either encoder closes the frame and raises *TX underrun*.

**Modulation and carrier.** `tx_mux` turns the source and envelope into one of three
levels: off, full, or reduced. `ask_modulator` maps them to amplitudes: 0, `A`, and
`A*(1 - depth/256)`. The default depth of 77/256 is the 30 % used with the 8 us tari; 38/256
gives 15 %. `tx_filter` sets the slew rate of the pulse edges in two stages. First, a
slew-rate limiter moves the amplitude towards its target by at most 16·`slew` counts per
cycle, so rise and fall times are a run-time setting (`slew` = 0, the default, means no
limit). Then a binomial 8-tap kernel rounds the corners. On its own, that kernel turns a
step into a 175 ns S-curve without overshoot. `upconverter` multiplies the envelope by the sine output of
an NCO, a 32-bit phase accumulator with a 1024-entry table built at elaboration. Its default
tuning word, round(13.56/40 * 2^32), gives the 13.56 MHz carrier for the DAC. Amplitudes
must stay at or below 32767.

Latency from the encoder's envelope to the DAC is 7 register stages plus the 3.5-cycle group
delay of the transmit filter.

## Receive path

This is the part that needs the most care: it has to turn a noisy, filtered analog envelope
into bits while the tag's clock drifts.

**Conditioning.** The 14-bit ADC sample is left-aligned into an int16 datapath (multiplied
by 4). `rx_filter` is an order-8 (9-tap) low-pass. Its Hamming-windowed coefficients
(3 11 30 53 62 53 30 11 3)/256 give unity gain and a 2.5 MHz cutoff. `moving_average`
integrates over a run-time length of 1 to 128 samples. It outputs the mean,
sum*round(2^24/len) >> 24, not the sum, so the slicer threshold stays on the signal's scale.
The reciprocals come from a table computed at elaboration. `slicer` outputs 1 when the mean
is strictly above the programmable threshold.

The length is what adapts the chain to the two kinds of reply:

* An EPC tag replies in FM0 directly on the envelope. The average then runs over half a
  link-frequency period: 24 samples at 847 kHz, the reset value. The default threshold of
  4096 on the int16 scale is roughly half of a 7200-count reply.
* An ISO/IEC 15693 tag modulates its answer onto a 423.75 kHz subcarrier. At the ADC, a
  modulated half symbol is therefore a burst of subcarrier, and an unmodulated one is flat.
  Averaged over one subcarrier period (94 samples), a burst becomes a steady level, half its
  swing above the unmodulated level. The slicer then separates the two with a threshold at
  about a quarter of the swing. No separate subcarrier demodulator is needed.

When the length changes, the window restarts: samples from before the change count as zero.

**Synchronisation (`sync_rx_ctrl`).** The unit recovers the half-symbol timing from the
edges of the slicer output, and it uses the longest legal run without an edge to find the end
of a reply:

* After `rx_arm` it waits for a reply. The line idles low, and the first rising edge of the
  slicer output starts the first half symbol. If no edge comes within `REG_RXTMO` cycles
  (default 4000, 100 us), it raises *RX timeout*.
* A phase counter runs over the half period `REG_RXHALF`. Every slicer edge resets it, so
  the sampling follows the tag's actual bit rate. The 847 kHz half symbol is 23.6 cycles,
  and the register holds 24.
* The slicer output is sampled in the middle of each half symbol.
* In FM0 the line changes level at least every second half symbol. So a third half period
  without an edge cannot be part of a reply. At that point the reply is over: the unit emits
  *frame end* and drops that sample.
* An ISO/IEC 15693 answer opens and closes with three modulated half symbols in a row. In
  Manchester mode the reply therefore ends only at the fourth half period without an edge.

**Decoding (`symbol_decoder`).** Half samples are paired from the start of the reply.

* FM0: equal halves give 1, a change in the middle gives 0. A missing level change at a
  symbol boundary sets the *violation* flag.
* Manchester (ISO 15693 answer, modulated = high): high-low gives 0 and low-high gives 1.
  Two low halves are a violation.

The ISO 15693 answer is framed, and the decoder strips the frame:

* The start of frame is three high halves followed by a logic 1 (low, high). The decoder
  checks these five halves and sets *violation* on a mismatch.
* The end of frame is a logic 0 followed by three high halves. Two high halves never occur
  inside Manchester data, so a high-high pair marks the end of frame. The logic 0 before it
  has already been decoded by then. To drop it, every Manchester bit is held back until the
  next pair has been seen. Halves after the end of frame are ignored.
* An answer that stops without an end of frame sets *violation*, and its held-back last
  bit is lost.

Two consequences of the FM0 end-of-reply rule are worth knowing:

* When a reply ends high, the line's fall to idle looks like one more symbol of two low
  halves. So the decoder holds back every low-low symbol. If another half sample follows, it
  emits the symbol with its violation check. If the reply ends instead, it drops it. A
  genuine low-low symbol at the very end of a reply is dropped as well. The FM0 replies of
  EPC Gen-2 end in a dummy data-1 for exactly this reason, and the DSP knows how many bits
  it expects.
* In FM0, a missing boundary change before a data-1 makes three equal halves. The receiver
  then ends the reply early instead of flagging a violation. The bit count in `REG_RXINFO`
  exposes that.

**Reg, IR (`rx_reg_ir`).** Bits are packed MSB-first into 32-bit words. A final partial word
is right-aligned. Words go to the receive FIFO (64 words). At the end of a reply the unit
latches the bit count and the violation flag and raises *RX done*.

## DSP interface (`dsp_if`)

A synchronous bus: `bus_cs`, `bus_we`, a 4-bit word address and 32-bit data. Reads return
data one cycle after the access. The register map is this design's own; the constants are
in `rfid_pkg`.

| addr | name | contents |
|---|---|---|
| 0 | CTRL | [0] carrier on, [1] reply code (0 FM0, 1 Manchester), [2] reader code (0 PIE, 1 1-out-of-4) |
| 1 | TXCMD | write [0]=1 to start a frame, [1] preamble (else frame-sync) |
| 2 | TXBIT | write [0] bit, [1] last bit |
| 3 | TARI | [15:0] tari, [31:16] pulse width |
| 4 | RTCAL | [15:0] RTCal, [31:16] TRCal |
| 5 | DELIM | [15:0] delimiter |
| 6 | ASK | [15:0] full amplitude (default 30000), [23:16] depth/256 (default 77), [31:24] slew limit in 16 counts per cycle (0: none) |
| 7 | FTW | oscillator tuning word |
| 8 | RXTHR | [15:0] signed slicer threshold |
| 9 | RXHALF | [15:0] half-symbol period, [23:16] moving-average length (default 24) |
| A | RXTMO | [23:0] reply timeout |
| B | RXWORD | read pops the next received word (0 if empty) |
| C | STATUS | [4:0] flags: TX done, RX done, RX timeout, TX underrun, RX overflow (write 1 to clear); [15] TX FIFO full; [31:16] TX FIFO fill |
| D | IRQEN | interrupt enables, same bits as the flags |
| E | RXINFO | [15:0] bits of the last reply, [16] violation, [31:24] words queued |
| F | SLOT | [15:0] 1-out-of-4 slot length (default 378) |

`irq` is high while any enabled flag is set. All timing values are in 40 MHz cycles.

## What comes from the source, and what does not

Taken from the published design:

* the chain of blocks in both directions;
* the 40 MHz common clock and the 16-bit DAC and 14-bit ADC widths;
* the upconversion to 13.56 MHz in the FPGA;
* an order-8 receive filter;
* a moving average over half a link period (the reset value of the length);
* a slicer with a programmable threshold of 4096;
* FM0 at 847 kHz;
* PIE with the two measured parameter sets;
* 1-out-of-4 coding with Manchester answers for ISO/IEC 15693;
* an ISO/IEC 15693 answer that reaches the ADC as bursts after the envelope detector.

This design's own choices:

* every filter coefficient;
* the NCO;
* the symbol rules and the ISO 15693 start and end of frame, taken from the EPC Gen-2 and
  ISO/IEC 15693-2 standards rather than from the source;
* the slew-rate limiter that makes the edge slope programmable; the source only lists slew
  rate among the parameters it controls;
* receiving the ISO 15693 subcarrier by setting the moving average to one subcarrier period,
  and making the length a run-time register for that;
* the delimiter length;
* the synchronisation method and its end-of-reply rule;
* the word packing;
* the register map, the FIFO depths and the interrupt scheme.

Known limits:

* The ISO 15693 answer is received only in its one-subcarrier, high-data-rate form: 26.48
  kbit/s with 8 subcarrier pulses per half symbol. The two-subcarrier (FSK) form would need
  a different demodulator, and the source does not describe one.
* The average is at most 128 samples long (`MA_MAX_LEN`). That covers link frequencies down
  to about 160 kHz (FM0 half period) and the 423.75 kHz subcarrier.
* Only the HF-style FM0 and Manchester reply codes are decoded. Miller-coded replies of
  EPC Gen-2 are not supported, and the source does not mention them.
* The depth field has 8 bits, so the deepest modulation is 255/256 of the amplitude. The
  100 % ASK of ISO/IEC 15693 is therefore sent as 99.6 %.
* The receiver assumes that the line idles low (no reply = below threshold). The first
  rising edge after `rx_arm` starts a reply, so a noise spike above the threshold would
  start a false one.
* UHF operation depends on the front end's converters to and from 13.56 MHz; nothing in the
  RTL is UHF-specific.
* The board carries two DACs and two ADCs, but the signal chain uses one of each. The
  source does not say what the second pair is for.
* The DSP software, the converters, the analog front end and the Ethernet link are outside
  this RTL.

Synthesised with yosys at the defaults, the top is about 740 word-level cells and 760
flip-flop bits, plus some 28 kbit of memory. Of that memory:

* 16 kbit is the sine table;
* 3 kbit is the two FIFOs;
* the rest is the moving average's ring buffer and reciprocal table, and the filter delay
  lines.

## Verification

Each block in `rtl/` has a self-checking testbench `tb/tb_<block>.sv`. It compares the block
with a model written independently in the testbench, and ends by printing
`TB_RESULT checks=N failures=M`. `tb_rfid_reader_fpga` runs the whole design at its default
parameters, in about 7 ms of simulated time. It plays both the DSP and the front end:

* It recovers the transmitted envelope from the DAC samples and measures every pulse width
  and pulse spacing. This covers the two PIE settings, both frame openings, and an ISO 15693
  inventory command with its CRC in 1-out-of-4 coding.
* It plays noisy replies into the ADC, with and without coding errors, and compares the words
  read back. These are FM0 replies on the envelope, and framed ISO 15693 answers on the
  subcarrier.
* It also covers timeout, underrun, carrier on/off, and the fall time of a slew-limited
  frame.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/rfid_pkg.sv tb/tb_rfid_reader_fpga.sv --top-module tb_rfid_reader_fpga
./obj_dir/Vtb_rfid_reader_fpga
```

Replace the testbench name to run any other block's test. `rfid_pkg.sv` must come first;
everything else is found through `-y`.
