# Digital downconverter bank for a wideband VLBI backend

A wideband VLBI backend records a few channels, each 512 MHz wide. Most
VLBI stations record many narrow channels of up to 16 MHz. Correlating the
two means converting the wideband data into the narrowband format. This
design does that conversion in one FPGA.

- Input: three 512 MHz real signals (in geodetic use, two X-band and one S-band), each
  arriving as VDIF frames over 10 Gigabit Ethernet.
- Output: 16 independently tuned video channels of 16 or 8 MHz. They are quantised to
  2 bits and sent as one VDIF stream, again over 10 Gigabit Ethernet.

The RTL covers all of the digital signal path, from the receive word streams of
the three 10GE MACs to the transmit word stream of the output MAC. It leaves out
the MACs, the transceivers, the control processor and its 1G Ethernet port. The
configuration they would write appears as ports of the top, `ddcb_top`.

## Signal flow

```
rx stream 0 ─ data_buffer ─ pfb_dft8 ─┐ 8 sub-bands          ┌─ ddc_channel 0 ─┐
rx stream 1 ─ data_buffer ─ pfb_dft8 ─┼─ (24) ─ channel_switch┼─ ...           ─┼─ vdif_formatter ─ eth_framer ─ tx stream
rx stream 2 ─ data_buffer ─ pfb_dft8 ─┘                       └─ ddc_channel 15─┘        ▲
          │ first header                                                 timer ─ pps delay
          └──────────────────────────────────────────────────────────────────┘
ddc_channel = quarter_shift ─ sideband_sep ─ freq_converter ─ quantizer2
              (±32 MHz)      (front, USB/LSB) (NCO mixer, ÷2, separator, 8/16 MHz filter)
```

Everything after the data buffers runs on one 128 MHz clock `clk`. The
input signal is 1024 MS/s, so each stream is eight 8-bit samples per
clock, or 8.192 Gb/s. The receive side runs on `rx_clk`. Each data buffer holds a dual-clock FIFO that
crosses the two clock domains.

| point in the chain             | rate per channel | form                        |
|--------------------------------|------------------|-----------------------------|
| data buffer output             | 128 MHz × 8      | real, 8 bit                 |
| prefilter output, per sub-band | 128 MS/s         | complex, 16 + 16 bit        |
| front separator output         | 128 MS/s         | real, 16 bit (one sideband) |
| after mixer + half-band        | 64 MS/s          | complex                     |
| video (16 MHz / 8 MHz)         | 32 / 16 MS/s     | real, 16 bit                |
| quantiser output               | 32 / 16 MS/s     | 2 bit                       |

## Data buffers (`data_buffer`, `async_fifo`)

Each incoming Ethernet frame holds these, in order:

- `HDR_OFFSET` bytes of lower-layer headers (default 42: Ethernet + IPv4 + UDP);
- a VDIF header, normally 32 bytes, or 16 bytes if its legacy bit is set;
- the payload.

The buffer realigns the 64-bit words to the start of the VDIF data. It then
decodes the seconds, epoch, frame number, frame length and the invalid bit. Payload words go into a
4096-word FIFO. The samples are VDIF offset binary. Each byte's MSB is
flipped to give two's complement.

The buffer counts four events:

- frames received;
- gaps in the frame numbers;
- frames marked invalid;
- words lost to a full FIFO.

A lost frame is counted but not filled. The output then slips by one frame.
At this level that cannot be told from a frame that was never sent.

The buffer signals `ready` once it holds `PREFILL` words (half the FIFO) and
has seen a header. All three buffers start reading together, on the AND of
their `ready` signals. From then on they deliver one word per clock without
a break. That makes the three streams sample-aligned, provided their first
frames carry the same time. If a FIFO runs empty, the buffer sends zero
samples in place of the missing data and counts an underflow.

## Prefilter (`pfb_dft8`)

The prefilter is a polyphase DFT filter bank with M = 8 branches and 8 taps
per branch. The prototype has 64 taps: a Blackman-windowed sinc with cut-off at
64 MHz (half the channel spacing). Sub-band i is centred on i·128 MHz:

    y_i[k] = Σ_{n=0}^{63} h[n] · x[8k + 7 − n] · e^{+j2π i n / 8}

Because of the decimation the exponent needs only eight twiddles: 0, ±1 and
±√2/2. The DFT is therefore built from adders and one constant multiply by
√2/2 per product. Each sub-band is complex at 128 MS/s and covers
i·128 ± 64 MHz. Neighbouring sub-bands overlap in the transition band of the
window.

For a real input, sub-band 8 − i is the complex conjugate of sub-band i, so
sub-bands 5 to 7 repeat 3 to 1 with the spectrum mirrored. Sub-band 0 covers
0 to 64 MHz and sub-band 4 the range around 512 MHz, each with both mirrored
halves.

The main weakness of the partition is the frequency i·128 MHz itself. It lands
at 0 Hz in its sub-band, where the sideband separators cannot work (the "blind
zone"). The complementary ±32 MHz converter in each channel (below) handles
this.

Latency: the output appears 3 clocks after the input word.

## Channel switch (`channel_switch`)

The switch is a registered 24-to-16 crossbar. `cfg[k].src = stream·8 + band`
selects the sub-band for channel k. A select of 24 or more gives silence.

## One downconverter channel (`ddc_channel`)

### ±32 MHz complementary converter (`quarter_shift`)

This stage multiplies the complex sub-band by j^n or (−j)^n, which shifts it by
+32 or −32 MHz, a quarter of the sample rate. The arithmetic is exact:
the I and Q samples are swapped and their signs changed.

A tone at 128·i + 1 MHz sits 1 MHz from a sub-band centre, which is too close
for the separator. After the shift it sits at 33 MHz or −31 MHz, where the separator works well.

### Front sideband separator (`sideband_sep`)

This is the phase method, with H a Hilbert transformer:

    usb = (I − H{Q}) / 2,   lsb = (I + H{Q}) / 2

The upper output is a real 128 MS/s signal that holds the positive-frequency half of
the complex sub-band. The lower output holds the negative-frequency half,
mirrored to positive frequencies. `cfg.front_sb` chooses which of the two goes on.

H is a 63-tap type III FIR, Blackman-windowed 2/(πk) on the odd taps. The I path
has a matching 31-sample delay.

A Hilbert FIR cannot work near 0 Hz or near 64 MHz. For the top of the band
the separator has spectrum inverters at its inlet and outlet
(`cfg.invert`):

- The inlet inverter multiplies by (−1)^n. This moves the band edge at ±64 MHz to 0
  and 0 Hz to ±64 MHz.
- The outlet inverter multiplies the real output by (−1)^n, which moves it back.
- The two outputs are swapped, so `usb` stays the upper sideband.

Switching the inverters on does not change the output frequency. It moves
the region where the filter is used from the top of the band to the bottom.

Measured suppression of the unwanted sideband with this filter is 35 dB or more
from about 3.9 MHz to 60 MHz. A type III Hilbert filter has no gain at 0 Hz and
at 64 MHz, and its response is symmetric about 32 MHz. With this filter both
modes therefore separate the same range, and inversion mode brings no gain in
coverage. The inverters are built and tested anyway. They matter once the
filter is replaced by one whose response is not symmetric, for example a
design with a separate low-frequency path.

### Frequency converter (`freq_converter`, `nco`, `halfband_decim`)

The stages in order:

1. **Mixer.** I = x·cos φ, Q = −x·sin φ, with φ from the NCO. The NCO frequency
   f0 = `fword` × 10 kHz moves to 0 Hz.
2. **Decimation by 2.** A 23-tap half-band filter on I and Q brings the rate
   to 64 MS/s.
3. **Second sideband separator.** The same block as the front one, running
   at 64 MS/s. `cfg.out_sb` = 0 gives the band above f0, 1 the band below.
4. **Video filter.** A half-band filter from 64 to 32 MS/s gives the 16 MHz band.
   With `bw8` = 1 a second half-band filter brings it to 16 MS/s, the 8 MHz band.

The NCO is a phase accumulator modulo 12800, so at 128 MS/s one step is exactly
10 kHz. `fword` runs from 0 to 6399, which is 0 to 63.99 MHz.

Sine and cosine come from one quarter-wave table of 3201 Q15 entries,
sin(π/2 · i/3200). The table is computed when the design is elaborated,
and quadrant folding gives the other three quarters.

**Tuning a channel.** To put sky frequency F of stream s into channel k, work
in this order:

1. Take the sub-band i = round(F / 128 MHz) and d = F − 128·i, which lies in
   (−64, 64) MHz.
2. If |d| is under about 4 MHz, use the ±32 MHz shift and add ±32 to d.
3. Choose the front sideband: USB when d > 0, LSB when d < 0. The converter
   then sees |d|.
4. `invert` may stay off: with the filter used here it does not widen the
   usable range (see above).
5. Set f0 to the lower edge of the video band (`out_sb` = 0) or to its upper
   edge (`out_sb` = 1).

The sub-bands 5 to 7 also reach the negative half of the mirrored spectrum. The
end-to-end test uses all of these paths.

### Two-bit quantiser (`quantizer2`)

The quantiser sums the squares of 2^16 video samples. At the end of each interval a
bit-serial square root (16 clocks) gives σ, and the new threshold t = 0.98σ
takes effect. The output codes are VDIF offset binary:

| input x       | code |
|---------------|------|
| x < −t        | 00   |
| −t ≤ x < 0    | 01   |
| 0 ≤ x < t     | 10   |
| x ≥ t         | 11   |

The threshold starts at 4096. It never goes below 1, so a silent channel sends
10 throughout. Each channel's threshold is a top-level output.

All channels share `bw8`, so all 16 produce their samples on the same clocks.
An assertion in the top checks this.

## Time keeping and output framing

### Timer (`timer`) and second pulse

The timer starts from the first frame header of buffer 0:

- seconds and epoch are copied from the header;
- the tick count within the second is frame number × payload words per frame.

It then advances once per buffer-0 output word. It wraps at 128·10^6 ticks, the
number of 128 MHz words in a second, and gives a pulse on every wrap.

The data path delays the samples. The pulse is delayed to match: 97 clocks in the
16 MHz mode and 143 in the 8 MHz mode. That way it arrives at the formatter
together with the quantised sample taken at the second boundary.

### VDIF formatter (`vdif_formatter`)

The formatter starts at the first delayed second pulse after the buffers run.

- **Sample words.** One sample time of all 16 channels is one 32-bit VDIF
  word, with channel c in bits 2c+1:2c. Two sample times fill a 64-bit word, the
  earlier one in the low half.
- **Frames.** A frame holds 1000 words (8000 bytes), which is 62.5 µs at 16 MHz or
  125 µs at 8 MHz. Frame numbers restart at 0 on every second pulse.
- **Header.** The header has 32 bytes:
  - seconds and epoch from the timer, then the frame number;
  - version 0, log2(16 channels) and the frame length (1004 in 8-byte units);
  - real data, 2 bits per sample, thread and station id;
  - four words of extended user data from `vdif_user`, for the bank's own
    settings.

The payload waits in a FIFO of two frames until a frame is complete. The frame
is then sent on a valid/ready stream, so output back-pressure never stalls the
signal path. Words lost to a full FIFO are counted (`drop_cnt`).

### Ethernet framer (`eth_framer`)

Each VDIF frame is wrapped in one of two ways:

- **Raw Ethernet** (`eth_cfg.udp_en` = 0): a 14-byte header with EtherType 0x88B5.
- **Ethernet + IPv4 + UDP** (`udp_en` = 1): 42 bytes of headers. The IPv4 header
  checksum is computed in the framer, TTL is 64 and Don't-Fragment is set. The UDP
  checksum is 0.

Neither header is a whole number of 64-bit words. The payload is therefore shifted
by 6 or 2 bytes through a carry register, and a final partial word goes out
with `tx_keep` marking its valid bytes. Byte 0 (bits 7:0) goes first on the
wire. The MAC adds the FCS.

### Data capture (`data_capture`)

On `cap_arm`, the next 1024 video samples of channel `cap_sel` (16-bit values
taken before quantisation) are written to a RAM. After that `cap_done` goes high,
and the control processor reads the RAM through `cap_rd_addr` / `cap_rd_data`.

## Configuration ports

| port                 | meaning |
|----------------------|---------|
| `cfg[k].src`         | sub-band for channel k, stream·8 + band (≥ 24: silence) |
| `cfg[k].qshift`      | `QS_OFF`, `QS_UP` (+32 MHz), `QS_DOWN` (−32 MHz) |
| `cfg[k].invert`      | inverters of the front separator on |
| `cfg[k].front_sb`    | 0: upper, 1: lower front sideband |
| `cfg[k].fword`       | NCO frequency in 10 kHz (0..6399) |
| `cfg[k].out_sb`      | 0: band above f0, 1: band below f0 |
| `bw8`                | 1: 8 MHz video bands, 0: 16 MHz (all channels) |
| `thread_id`, `station_id`, `vdif_user` | VDIF header fields |
| `eth_cfg`            | MAC and IP addresses, UDP ports, `udp_en` |

Change `bw8` only while the design is held in reset. The pulse delay and the
frame length depend on it.

## Parameters of `ddcb_top`

| parameter        | default | meaning |
|------------------|---------|---------|
| `HDR_OFFSET`     | 42      | bytes in front of the VDIF header of an input packet |
| `BUF_DEPTH_LOG2` | 12      | input FIFO, 4096 words of 8 samples |
| `PREFILL`        | 2048    | words buffered before output starts |
| `Q_LOG2_N`       | 16      | quantiser RMS interval, 2^16 samples |
| `PAYLOAD_WORDS`  | 1000    | 64-bit words per output VDIF frame |
| `FMT_FIFO_LOG2`  | 11      | formatter payload FIFO |
| `TICKS_PER_SEC`  | 128e6   | input words per second |
| `PPS_DELAY16/8`  | 97/143  | second-pulse delay = signal-path latency |
| `CAP_DEPTH_LOG2` | 10      | capture RAM, 1024 samples |

The numbers fixed by the system itself live in `ddcb_pkg`: 8 sub-bands, 3 inputs,
16 channels, the 10 kHz step and 16-bit signals. The package also computes all
filter tables from their formulas.

## What comes from the system description and what is this design's own

These follow the description of the instrument:

- three inputs of 512 MHz at 8 samples per 128 MHz clock;
- the data buffers that parse the packets and restore a continuous stream;
- an 8-branch polyphase DFT prefilter with a weighting window;
- a 16-channel switch;
- the ±32 MHz converter for the blind zones;
- the phase-method separator with inlet and outlet inverters, and its ranges;
- the converter chain: mixer, tables-based NCO of 0 to 63.99 MHz in 10 kHz
  steps, ÷2, separator and 8/16 MHz filter;
- the RMS-based 2-bit quantiser;
- the timer, VDIF frames with the decoded time, raw Ethernet or UDP/IP framing,
  and the data capture.

These are this design's own choices:

- all word widths, filter lengths and windows;
- the packet layout in front of the VDIF header;
- the buffer sizes and the start rule;
- zero fill on underflow;
- the VDIF frame size;
- the quantiser interval and the 0.98σ factor;
- the EtherType;
- the use of the VDIF user words;
- the capture size.

The system description also specifies two refinements that are not built here:

- a separate path for the low-frequency part of the spectrum in the sideband
  separators;
- a split of the converter's separator band into three sub-bands.

It does not describe either in enough detail. As a result the separators fall short of the stated ranges at the low edge:

| separator | stated range      | this design (35 dB suppression)     |
|-----------|-------------------|-------------------------------------|
| front     | 0.15 to 52 MHz    | from about 3.9 MHz                  |
| converter | 0.1 to 25 MHz     | from about 2 MHz (up to about 30 MHz) |

Below those edges, use the ±32 MHz shift or another NCO setting to keep the
wanted band away from 0 Hz.

## Limitations to know about

- **Mirror of the converter input.** The converter mixes a real signal. A
  component at f also appears at −f, and after the mixer at 128 − f − f0 MHz
  (modulo 128). The half-band decimator removes this image only while it stays
  outside ±32 MHz of the new centre. Tuning both the front band and the NCO
  high, for example a 60 MHz input with a 55 MHz NCO, puts the image at 13 MHz, inside the band.
  Keep f + f0 below about 90 MHz, or use the other front sideband or the ±32 MHz
  shift.
- **Fixed-point scaling.** The prefilter divides by 512 and the separators
  halve. Input tones of full 8-bit scale saturate some sub-bands. The tests use
  amplitudes of around 60 LSB plus noise.
- **Time alignment.** The three streams are aligned only by starting them
  together. Their first frames are assumed to carry the same time. The headers
  of streams 1 and 2 are decoded, but only stream 0 sets the time.
- **Pulse delay.** The second-pulse delays are the measured latency of this data
  path. If a filter length changes, they must be measured again.
- **Not in the RTL.** The control processor and its software, the 1G Ethernet
  control link, the 10GE MACs and transceivers, and the reference oscillators.

## Verifying and simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if the simulation hangs.

| testbench            | what it checks |
|----------------------|----------------|
| `tb_async_fifo`      | order and content across unrelated clocks, full/empty, level |
| `tb_data_buffer`     | realignment for 42-byte offset, header decode, gap/invalid counts, prefill and go, underflow zero fill |
| `tb_pfb_dft8`        | all 8 sub-bands against a floating-point model of the formula, 3-clock latency |
| `tb_channel_switch`  | random routing, out-of-range select, 1-clock latency |
| `tb_quarter_shift`   | ±32 MHz rotation against complex arithmetic |
| `tb_sideband_sep`    | suppression ≥ 30 dB for tones on both sides, inversion mode near Nyquist, latency |
| `tb_nco`             | sine/cosine accuracy, exact 10 kHz period, phase clear |
| `tb_halfband_decim`  | output against direct convolution, 2:1 rate, 2-clock latency, unity DC gain |
| `tb_freq_converter`  | video frequency, amplitude and sideband suppression for tones around f0, 32/16 MS/s output rates |
| `tb_quantizer2`      | threshold = 0.98·RMS for several levels, code boundaries |
| `tb_ddc_channel`     | tones through every mode to the expected video frequency |
| `tb_timer`           | loading, second pulse period, seconds count |
| `tb_vdif_formatter`  | header fields, frame numbering per second, packing, back-pressure |
| `tb_eth_framer`      | both header types, IP checksum, payload shift, tail `keep` |
| `tb_data_capture`    | channel select, sample count, read-back |
| `tb_ddcb_top`        | the whole bank at reduced sizes |
| `tb_ddcb_full`       | the whole bank at its default sizes |

`tb_ddcb_top` uses 64-word input frames, a 1024-tick second, 16-word output
frames and small buffers. It runs the bank twice:

- 16 MHz bands with raw Ethernet;
- after a reset, 8 MHz bands with UDP/IP.

It sends three streams with tones, then stops the input. It checks:

- each output packet: length, EtherType, VDIF time stamps and frame numbers
  across second boundaries, header fields;
- the codes of tone channels against the silent channel.

It also counts how often these happened, and fails if any did not: output
back-pressure, an input frame gap, underflow, threshold updates, second
boundaries, the ±32 MHz shift, inversion mode, lower sidebands, both framings,
both bandwidths and data capture.

`tb_ddcb_full` runs the top with all defaults until two 8000-byte frames have
gone out (about 20,000 clocks). It checks them and the 8000-clock frame spacing.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/ddcb_pkg.sv tb/tb_ddcb_top.sv --top-module tb_ddcb_top -o sim
./obj_dir/sim
```

Change the testbench name to run another. The longest runs take well under
a minute each. The RTL is synthesizable SystemVerilog with no vendor primitives:

- the FIFOs and the capture RAM are inferred memories;
- the NCO table is a ROM initialised from a function;
- all coefficient tables are elaboration-time constants.

Remaining lint notes are unused bits of wide buses and status outputs that the
top does not bring out.
