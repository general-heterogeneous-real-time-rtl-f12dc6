# Dual-polarization RF-sampling baseband front-end (RFSoC programmable logic)

This RTL takes two radio-telescope signals, one per polarization, sampled directly at RF
(2048 MSps). It cuts a 100 MHz wide band centred on 256 MHz out of each, brings the band down
to complex baseband at 128 MSps, and packs both polarizations into 8192-byte frames. The frames
leave on a 512-bit port to a 100 Gb Ethernet core, which sends them to a GPU server for
channelization and integration. The data rate falls from 2 x 32.8 Gbit/s of raw ADC samples to
about 4.1 Gbit/s of 8-bit baseband. All further processing is done in software at the far end.

Throughout, the FPGA logic runs at 256 MHz and handles 16 samples of each polarization in
parallel. Each parallel lane (a *phase channel*) carries every 16th sample. That one choice sets
the shape of the mixer, the filter and the packet format.

```
 ADC pol0 ─8x16b─► pol_channel ─16 ch─► preproc ─8+8b cplx─┐
 (adc_clk)         FIFO + SIPO          mixer16, pdfb,      ├► pkt_gen ─64b─► pkt_fsm ─64b+EN/EOF─► gbe_sync ─512b─► tx_*
 ADC pol1 ─8x16b─► pol_channel ─16 ch─► preproc ───────────┘  SIPOs,          frames           RAM + sync
                                         requant                 256b, slices
 AXI4-Lite ─► axil_regs (FIFO reset / read enable, packetizer enable, LO, scaling, user field, IP, port)
```

## Rates at a glance

| point | format | rate |
|---|---|---|
| ADC word (per pol) | 8 x 16-bit real | 256 MHz (2048 MSps) |
| FIFO output / phase channels | 16 x 16-bit real | one vector per 2 clocks (128 M vectors/s) |
| mixer output | 16 x (16+16)-bit complex | same |
| filter output | 1 complex sample, 44-bit rails | 128 MSps |
| requantized | 8-bit re + 8-bit im | 128 MSps per pol |
| packets | 64 bits = 2 samples x 2 pols | one per 4 clocks |
| frame | 2 header + 1022 data packets = 8192 bytes | about 1 frame per 4090 clocks |
| Ethernet port | 512 bits (8 packets) | one word per about 32 clocks |

## Capture path: `adc_fifo`, `pol_channel`

Each RF-ADC stream delivers eight 16-bit samples per 256 MHz clock. `adc_fifo` is a dual-clock
FIFO. Its write side pairs two consecutive ADC words into one 256-bit entry. The read side, on
the FPGA clock, hands out all 16 samples at once. Pointers cross the clock domains in Gray code.
The write side has a valid/ready handshake: ready drops only when the FIFO is full. The ADC itself
cannot wait, so a refused word is lost, and software starts reading before that happens.
`pol_channel` adds the 16-channel serial-in/parallel-out stage. It is one register that puts the
k-th sample of each 256-bit word on channel k, so channel k holds samples `16m + k`.

The top reads both polarization FIFOs with one enable, and only when neither is empty. From there
on both chains advance on the same clocks, which `pkt_gen` relies on when it interleaves them.
Assertions in the top check this alignment.

## Mixing without a phase accumulator: `mixer16`

The band is centred on 256 MHz = fs/8. Channel k multiplies its sample `x[16m+k]` by
`exp(+j*2*pi*lo_step*(16m+k)/8)`. Since `16*m*lo_step` is a multiple of 8, the LO phase of a
channel never changes. It is one of eight values, picked by `(lo_step*k) mod 8`. Each channel
therefore uses one fixed complex coefficient from an 8-entry Q1.15 cos/sin table: two
multiplies, with no NCO. `lo_step` can be set from software, but only to multiples of fs/8.

The exponent is positive, so the band comes out **inverted**. 306 MHz lands at -50 MHz, 256 MHz at
0 and 206 MHz at +50 MHz, and a 231 MHz test tone appears at +25 MHz. This matches the behaviour
the reference system reports.

## Polyphase decimation with shared coefficients: `pdfb`

This block is the core of the design and the largest consumer of multipliers.

**Prototype.** The prototype is a 672-tap linear-phase low-pass filter, `h(n) = h(671-n)`, designed
for fs = 2048 MHz. Its pass band is 0-50 MHz and its stop band starts at 58 MHz. After decimation
by 16 the output rate is 128 MSps. Alias images from 70 MHz upward fold to more than 50 MHz from
the centre, outside the pass band.

**Polyphase split.** With D = 16 branches of Q = 42 taps, branch i has coefficients
`g_i(q) = h(qD + i)`. The filter output for input vector m is

```
y[m] = sum_{n=0}^{671} h(n) * x[16m + 15 - n]
     = sum_i sum_q g_i(q) * chan_{15-i}[m - q]
```

So branch i filters phase channel 15-i, and the 16 branch outputs are added together. One output
is produced per input vector: this is decimation by 16, with every multiplier busy on every
vector.

**Sharing.** Symmetry of h gives `g_i(q) = g_{15-i}(41-q)`. Branches i and 15-i contain the same
coefficients, in opposite order. Hardware row r therefore stores only `h_r(0..20) = h(16q + r)`
for q < 21. Together these 16 x 21 = 336 values are exactly the first half `h(0..335)` of the
prototype, which is all that `rtl/pdfb_coeffs.hex` holds. Each row has two delay lines of 21
samples:

* the **signal line** takes in the row's own channel (15-r), newest sample first;
* the **feedback line** takes the sample that leaves the far end of the *partner* row's signal
  line (row 15-r, carrying channel r). It holds that channel's delays 21..41 and runs in the
  opposite direction.

Tap n of row r computes `h_r(n) * (signal[n] + feedback[20-n])`. That is one pre-adder and one
multiplier per shared coefficient. Summed over all rows this gives exactly the 672-tap
convolution above. It uses 336 multipliers per real rail instead of 672, with the same number of
delay registers. Real and imaginary rails are filtered by identical copies.

**Pipeline and widths.** The pipeline is: delay-line shift, pre-add (17 bits), multiply by an
18-bit coefficient (35 bits), sum of 21 taps, then sum of 16 rows. The result is kept at 44 bits
with no rounding inside the filter. `out_valid` comes 5 clocks after the `in_valid` that completed
the vector. The testbench checks the output bit for bit against a direct 672-tap convolution.

**Coefficients.** The reference system uses an unpublished 672-tap equiripple design. The
coefficients here are a Parks-McClellan design, fitted to the same type, order and band, with
these settings:

* pass band 0-50 MHz, stop band from 58 MHz, stop-band weight 20;
* quantized as `round(h * 2^20)` to 18-bit two's complement;
* pass-band ripple about ±0.11 dB, stop band about -63 dB, DC gain 1.0126 x 2^20.

To use other coefficients, write NTAPS/2 hex lines, h(0) first, to `rtl/pdfb_coeffs.hex`. Another
path can also be passed through the `COEF_FILE` parameter. Paths are relative to the directory the
tools run from.

## Requantization: `requant`, `preproc`

`preproc` chains `mixer16` -> `pdfb` -> `requant`. `requant` rounds each rail half-up by a
run-time shift and clips it to 8 bits. The default shift is 28. A full-scale real tone of amplitude
A then comes out as a complex tone of magnitude about `A/2 * 1.0126 / 256`, roughly 55 for
A = 28000. From in_valid to out_valid, `preproc` takes 7 clocks.

## Packets and frames: `pkt_gen`, `pkt_fsm`

`pkt_gen` gathers 8 consecutive samples of each polarization. It interleaves them into a 256-bit
word, most significant first: `{P0_0.re, P0_0.im, P1_0.re, P1_0.im, P0_1.re, ...}`. The word is
then cut into four 64-bit packets. Each packet carries two consecutive time samples of both
polarizations:

```
 63      56 55      48 47      40 39      32 31      24 23      16 15       8 7        0
[ P0 re t ][ P0 im t ][ P1 re t ][ P1 im t ][P0 re t+1][P0 im t+1][P1 re t+1][P1 im t+1]
```

The packets go to the framing FSM over a valid/ready handshake. `pkt_gen` holds one word. If a
new word is completed while slices of the old one are still unsent, the newest word replaces it
and `drop_pulse` fires. This happens while framing is switched off. Because the newest word is
kept, the stream has no gap once framing starts. At normal rates the FSM stalls the multiplexer
for only 3 clocks per frame, against 12 spare clocks per word, so no data is dropped.

`pkt_fsm` has five states:

| state | clocks | output |
|---|---|---|
| IDLE | until `enable` | nothing |
| F_HEAD | 2 | header packet `{user[3:0], count[59:0]}`, EN |
| WAIT | while no packet is offered | nothing |
| F_DATA | one per data packet | data packet, EN |
| E_DATA | 1, after the 1022nd data packet | EOF (EN low) |

The counter counts only in F_HEAD, so header packets of successive frames are numbered 0, 1, 2, ...
without gaps. A receiver can use this to detect lost frames. After E_DATA the FSM goes straight
back to F_HEAD. Reset returns it to IDLE from any state.

## 512-bit output and EOF placement: `gbe_sync`

Packets fill one bank of a two-bank RAM, eight 64-bit entries per bank, while the other bank is
read out as a 512-bit word. Packet 0 of a word is in bits 511:448. A word appears two clocks after
the EN of its eighth packet, together with `en_512`.

EOF needs care. The FSM raises EOF on the clock *after* the frame's last packet, with EN low. That
is exactly the clock in which the word holding that packet is read from the RAM, so `eof_512` is
simply `eof` on a word-read clock. A frame has 1024 packets, a multiple of 8, so EOF always falls on
a word boundary. If EOF ever arrives at another time, `eof_err` latches and shows in the STATUS
register.

## Software registers: `axil_regs`

This is an AXI4-Lite slave with a 5-bit byte address and 32-bit data. A write is taken when AW and
W are valid together. Responses are always OKAY, and byte strobes are honoured.

| addr | name | bits | reset |
|---|---|---|---|
| 0x00 | CTRL | [0] fifo_rst, [1] fifo_rd_en, [2] pkt_enable, [3] pkt_rst | 0 |
| 0x04 | LO_STEP | [2:0], LO = LO_STEP x fs/8 | 1 (256 MHz) |
| 0x08 | OUT_SHIFT | [5:0] | 28 |
| 0x0C | USER | [3:0] header user field | 0 |
| 0x10 | DEST_IP | IPv4 address to the Ethernet core | 0 |
| 0x14 | DEST_PORT | [15:0] UDP port | 0 |
| 0x18 | STATUS (ro) | [31:16] frames sent, [4] eof_err, [2:0] FSM state | |
| 0x1C | DROPS (ro) | packet-generator drops | |

To start streaming: set USER, DEST_IP and DEST_PORT; write CTRL = 0x2 to start reading the
FIFOs; then, once the filters have filled (about 50 vectors), write CTRL = 0x6.

## Top: `rfsoc_frontend`

The top wires the blocks above for two polarizations. A two-flop reset synchronizer carries the
reset, ORed with the software FIFO reset, into the ADC clock domain. Everything outside the
programmable logic is connected through ports:

* the two ADC streams and their clock;
* the processor's AXI4-Lite bus;
* the 100GbE core input (`tx_data`, `tx_valid` = EN_512, `tx_eof` = EOF_512, `tx_dest_ip`,
  `tx_dest_port`).

The clock chips generate the 10 MHz -> 256 MHz / 2048 MHz clocks; they are analog parts and are
not modelled. The RF-ADCs, the processor and the Ethernet MAC are also outside this RTL.

## Simulating

Every block has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`.
All of them use plain Verilator, run from the repository root so that `rtl/pdfb_coeffs.hex` is
found:

```
verilator --binary --timing --assert -Irtl rtl/bb_pkg.sv rtl/*.sv tb/tb_rfsoc_frontend.sv \
          --top-module tb_rfsoc_frontend -o sim && ./obj_dir/sim
```

Replace the testbench and top-module name to run another test.

| testbench | what it checks |
|---|---|
| `tb_adc_fifo` | order of a counting stream across unrelated clocks, full/push-back, read latency |
| `tb_pol_channel` | channel k = sample 16m+k, SIPO latency, vector rate = half the ADC word rate |
| `tb_mixer16` | all channels and all eight LO settings against a real-arithmetic model |
| `tb_pdfb` | bit-exact against a direct 672-tap convolution, 5-clock latency |
| `tb_preproc` | 231 MHz tone appears at +25 MHz with the expected gain; 400 MHz tone removed; 7-clock latency; a run-time LO change to 512 MHz; saturation at a small output shift |
| `tb_pkt_gen` | packet layout against a reference model, drops under a long stall |
| `tb_pkt_fsm` | header numbering, 1022 data packets, EOF timing, state coverage, reset to IDLE |
| `tb_gbe_sync` | 512-bit word contents and order, 2-clock latency, EOF on word 128, misplaced-EOF flag |
| `tb_axil_regs` | reset values, strobes, read-only words, held responses |
| `tb_rfsoc_frontend` | full design at its default sizes: see below |

The end-to-end test, `tb_rfsoc_frontend`, runs the whole design at its default sizes: 672 taps,
1024-packet frames and 512-bit output. It feeds tones at 231 and 281 MHz from an ADC clock that is
unrelated to the FPGA clock, then checks:

* the FIFO push-back, drops while framing is off, and every FSM state actually occur;
* each frame is 128 words with EOF on the last, and the header numbers are consecutive;
* the two polarizations decode to +25 MHz and -25 MHz tones at the expected amplitude;
* every pair of consecutive samples, across packets and frames, advances by the tone's phase
  step, which proves no sample is lost or repeated;
* a software packetizer reset puts the FSM in IDLE and clears the frame count, and after
  re-enabling, the next frame starts again at header number 0.

It runs three frames, then the reset and one more frame, in well under a second.

## How far to trust it, and where it departs from the reference scheme

These parts follow the reference scheme:

* 2 x 16 phase channels, 8 x 16-bit ADC words, 256-bit FIFO output;
* a 256 MHz centre, a 100 MHz band, a 672-tap symmetric filter in a 16-branch polyphase
  decimator with coefficient sharing between branches i and 15-i;
* the 256 -> 4 x 64-bit packet path, the five FSM states, the 2 + 1022 packet frame of
  8192 bytes, the 4-bit user field in the header, EN in F_HEAD/F_DATA and EOF from E_DATA;
* eight packets per 512-bit word.

These are this design's own choices:

* the filter coefficients (see above) and all internal word lengths: 18-bit coefficients, 16-bit
  mixer output, 44-bit accumulation, and requantization to 8 bits with a software shift;
* the FIFO depth (16 entries) and its handshakes;
* the header bit layout and the meaning of the header counter;
* the exact FSM transitions that the scheme leaves open (F_HEAD -> WAIT, and WAIT/F_DATA by data
  availability);
* the RAM organisation (two banks) and the way EOF is placed on the 512-bit word;
* the overflow policy of the packet generator;
* the complete register map and the STATUS/DROPS words;
* the LO restricted to multiples of fs/8.

Known differences and limits:

* **Channel spacing of the GPU modes.** The reference quotes 3.051 kHz and 0.763 kHz for 32768
  and 131072 channels, which is 100 MHz / N. The baseband from this front-end is 128 MSps complex
  (2048 / 16), so an N-point FFT of it gives 3.906 kHz and 0.977 kHz bins. The RTL follows the
  decimation by 16 and keeps 128 MSps.
* **Stop-band attenuation.** The reference filter's plot shows about -70 dB or better; the
  coefficients here give about -63 dB. Changing the file changes this, with no change to the RTL.
* The scaling of the filter output into 8 bits is not specified by the reference. The default shift
  suits strong test tones; for noise-like sky signals, set OUT_SHIFT so the RMS is a few LSB.
* The RF-ADC tiles, the clock chips, the processor, the 100GbE MAC and the GPU post-processing
  (polyphase filter bank, FFT, accumulation in CUDA) are outside this RTL. A plan with 4.096 GSps
  ADCs and 8-bit data per board would need ADC_LANES = 16 and a wider capture path; that is not
  built.
* Timing closure at 256 MHz on a real device has not been checked. The filter sums 21 products
  and then 16 rows in one clock each, which may need more pipeline stages on hardware.

## Files

`rtl/bb_pkg.sv` holds the shared constants, the FSM state type and the 8+8-bit complex sample
struct. `rtl/rst_sync.sv` is the reset synchronizer. Every other `rtl/*.sv` file is one of the
blocks above. `rtl/pdfb_coeffs.hex` holds the 336 stored filter coefficients.
