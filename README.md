# NEDA digitizer front-end in SystemVerilog

NEDA (NEutron Detector Array) is an array of liquid-scintillator detectors.
The liquid sees both neutrons and gamma rays. The two can be told apart by
the shape of the light pulse: a neutron pulse carries more of its charge in
a long, slow tail. Each NUMEXO2 digitizer samples 16 detectors at 200 Msps
with 14 bits. Its FPGA logic has three jobs:

- classify every pulse by charge comparison;
- keep a neutron's waveform and ask the trigger system (GTS) to accept it;
- send accepted waveforms, stamped with the GTS time, to the PCIe readout.

Gamma pulses are thrown away inside the digitizer. A separate trigger
processor decides acceptance. It counts trigger requests from all
digitizers inside a sliding time window (a multiplicity trigger).

This repository holds synthesizable RTL for one digitizer's digital part.
That covers both FPGAs of the board: the Virtex-6 front-end logic and the
Virtex-5 ADC interface with its 9 Mbit readout FIFO. The trigger
processor's multiplicity algorithm is included too, as a separate unit. It
is the design described in "Digital Front-End Electronics for the Neutron
Detector NEDA" (IEEE Trans. Nucl. Sci.). This is an independent
implementation of that description. Where the description is silent, the
choices are this RTL's own; they are listed at the end.

Everything runs on one 200 MHz clock, the sample clock, with one sample
per channel per clock.

## Signal chain

```
 7 DDR lanes x16 ──> adc_deser ──> psa_channel ──> chan_event_buf ──┐  (x16)
                                    (2 x psa_unit)   3 event buffers  │
                                                                      v
   cfg_* ──> spi_master ──SPI──> setup_regs ──> configuration   data_mgmt (readout order)
             oscilloscope, inspection_lines                  │ 8 DDR lanes, 1 word/clock
                                                             v  (adc_deser, 8 lanes)
   GTS answers (accept/reject + timestamp) ──> adc_interface ──> readout_fifo ──> PCIe
   16 trigger requests <──────────────────── (from chan_event_buf)

   multiplicity_trigger: timestamps in ──> window count ──> trigger, per-request verdict
```

`v6_firmware` holds everything above the link, including `setup_regs`.
`neda_top` holds the following:

- `v6_firmware`;
- the link lanes and their 8-lane receiver;
- `spi_master`, the Virtex-5 end of the SPI link;
- `adc_interface`;
- `readout_fifo`;
- `multiplicity_trigger`.

The embedded processor is not built. Its register accesses enter through
the `cfg_*` port: a one-clock `cfg_req` with read/write, address and data,
answered by `cfg_done` and `cfg_rdata`.
The GTS tree between the two sides is not built. The top brings out the
trigger requests (`treq`) and takes GTS answers back (`gts_*`). A system
would route requests through the GTS tree to the trigger processor (`tp_*`
ports) and return its verdicts.

## Sample recovery (`adc_deser`)

Each FADC channel sends 14 bits on 7 LVDS lanes, two bits per lane per
sample. One bit comes on the rising clock edge and one on the falling edge.
The module takes the bits already captured by the DDR input cells
(`lane_rise`, `lane_fall`). It interleaves them so that lane k gives bits 2k
(rising) and 2k+1 (falling). If the delay taps land half a bit off,
`edge_swap` re-pairs each falling-edge bit with the next rising-edge bit. A
sample appears 2 clocks after its rising-edge bits. The delay tap value
comes from the setup registers and is output as `iodelay_tap` for the FPGA
delay primitives.

The original firmware deserializes into half-rate even/odd sample streams.
This RTL keeps one full-rate stream per channel. The arithmetic below then
handles one sample per clock.

## Pulse-shape analysis (`psa_unit`, `psa_channel`)

This is the core of the design. For each pulse, two integrals are taken
over the baseline-corrected samples:

- the fast integral `If`, over the first `alpha` samples;
- the slow integral `Is`, over the next `beta` samples.

The defaults are alpha = 6 (30 ns) and beta = 28 (140 ns). The baseline is
the mean of the 32 samples before the pulse. The pulse counts as a neutron
(trigger request) when `Is >= delta_t * If`.

How it is built:

- **Baseline.** `psa_channel` keeps a running sum of the last 32 samples of
  a delayed copy of the input. No division is done: both integrals are
  kept scaled by 32. So `If = 32*sum(fast) - alpha*base_sum`, and the same
  with beta for `Is`. The comparison is exact integer arithmetic.
- **delta_t** is a 16-bit Q4.12 number (0x0400 = 0.25). The test is
  `Is * 4096 >= delta_t * If`, on signed values.
- **Event start.** An event starts when a sample rises above the baseline
  by more than the threshold `thr`. The start is a rising crossing only.
  The fast gate opens `PRE_TRIG` = 2 samples before the crossing, so that
  it holds the leading edge. A delay line of 2 samples makes that possible.
- **Latency.** After the last slow sample the unit waits a fixed `POST` =
  11 clocks (55 ns), then reports. The decision comes exactly
  alpha + beta + 11 = 45 clocks (225 ns) after the first gate sample. This
  is also the time during which a second pulse counts as pile-up.
- **Pile-up.** Each channel has two `psa_unit`s. A pulse that starts while
  the first is still integrating goes to the back-up unit. Both results are
  produced, and both events are flagged `pileup`. The back-up unit uses the
  baseline latched before the first pulse, since the running baseline is
  spoiled by then. A third pulse while both units are busy is lost and
  counted (`lost`).
- **Start-up.** After reset, starts are held off for 32 + 2 + 1 clocks.
  This lets the baseline window fill.

The units need alpha >= 1 and beta >= 1.

Two pulses that pile up are classified separately. Each one raises a trigger
request only if it is itself a neutron. Both waveforms are then stored with
the pile-up flag.

**Choosing the threshold.** The threshold has no hysteresis. A slow tail
that decays through the threshold while noise is on it can cross it a
second time. That second crossing is taken as a piled-up pulse. Set `thr`
where the tail falls faster than the noise can move it. For a slow
component of about 30 samples, the tail falls by thr/30 counts per sample
at the threshold. With a few counts of noise, thr = 300 is safe; the reset
value of 100 is not always safe. Hysteresis would cure this, but it would
also hide a real second pulse that arrives on the tail.

## Event buffers and readout order (`chan_event_buf`, `data_mgmt`)

Each channel has three event buffers of 250 samples (1.25 us). A buffer is
taken when an event starts. Its window begins `CAP_PRE` = 40 samples before
the crossing: the 32 baseline samples, the 2-sample gate lead and 6
samples of margin. It records 250 consecutive samples.

When the decision arrives:

- a **neutron** commits the buffer and raises a one-clock trigger request
  (`treq`);
- a **gamma** frees the buffer at once.

If all three buffers are in use, the event is counted in `overflow`. It
raises no trigger request, so requests and waveforms always stay paired.

`data_mgmt` keeps an order FIFO of commit masks, one entry per clock that
had any commit. It serves events in request order. Events committed on the
same clock are served lowest channel first. The GTS must answer in this
same order.

### Link format

The link to the Virtex-5 carries one 16-bit word per clock (400 MB/s).
`neda_top` sends it as it would go between the chips, on 8 lanes at
200 MHz DDR. A register stage puts bit 2k of the word on the rising edge
of lane k and bit 2k+1 on the falling edge. On the Virtex-5 side an
`adc_deser` with 8 lanes rebuilds the words. Its `edge_swap` input is the
top port `link_edge_swap`. The link adds 3 clocks. The two top bits frame
each word:

| bits 15:14 | meaning | rest |
|---|---|---|
| `00` | idle | zero |
| `10` | header | bit 13 pile-up, bits 3:0 channel |
| `01` | sample | bits 13:0 sample |

An event is one header and 250 samples, back to back. When events are
waiting, a new one starts every 254 clocks: the engine spends three idle
clocks taking the next channel and waiting for its first sample. With all
16 channels busy, the link can carry 49.2 kHz per channel. The article's rate target is 50 kHz
per channel, which is exactly 400 MB/s of samples alone. So this framing
is about 1.6% short at the full rate on every channel at once. Short bursts
above that rate are absorbed by the three buffers per channel.

## Virtex-5 side (`adc_interface`, `readout_fifo`)

The GTS answers each trigger request with accept or reject, the channel and
a 48-bit timestamp. The answer can arrive long before or long after the
waveform. `adc_interface` therefore queues both:

- link words in a staging FIFO (4096 words);
- answers in a response FIFO (64 entries).

It then pairs them in order. Rejected events are discarded. Accepted ones
are written to the readout FIFO as 36-bit words `{sop, eop, 2'b00, data}`:

| word | contents |
|---|---|
| 0 | sop, `{8'hA5, 3'b0, pileup, ch[3:0], 16'd250}` |
| 1 | `{16'b0, ts[47:32]}` |
| 2 | `ts[31:0]` |
| 3..127 | two samples `{2'b0, s[2k+1], 2'b0, s[2k]}`; the last word has eop |

Error handling:

- An event that does not fit in the staging FIFO keeps only its header,
  marked dropped. That header still uses up its answer (`n_dropped`).
- An answer whose channel differs from the event's header counts in
  `n_mismatch`.

`readout_fifo` is a first-word-fall-through synchronous FIFO of
262144 x 36 bits = 9 Mbit. Its read port is where the PCIe end-point
connects. Assertions flag writes when full and reads when empty.

## Multiplicity trigger (`multiplicity_trigger`)

Trigger-request timestamps arrive in ascending order. Each goes into a
window buffer, and a counter holds the number of requests now inside the
window. Each clock, the oldest entry `ts_o` is compared with the reference
time. The reference is the next input timestamp, or `now` when no input is
waiting:

- `ref >= ts_o + window`: the oldest leaves the window (decrement);
- otherwise the next input enters (increment).

`trigger = multiplicity > threshold`. A request gets a verdict when it
leaves the window. It is validated if the trigger was high at any time while
it was inside. Verdicts come out in request order on `out_*`.

## Setup registers (`setup_regs`)

This is an SPI slave, mode 0, MSB first, with 24-bit frames:

- bit 23: read;
- bits 22:16: address;
- bits 15:0: data.

SCLK must be at most clk/8. On the Virtex-5 side, `spi_master` produces
these frames at clk/16 (parameter `HALF` = 8). It turns one `cfg_req` into
one frame. `cfg_done` comes 393 clocks after the request.

| addr | register | reset |
|---|---|---|
| 0x00 | ID (RO) | 0x4E44 |
| 0x01 / 0x02 | alpha / beta gate, samples | 6 / 28 |
| 0x03 | threshold above baseline | 100 |
| 0x04 | delta_t, Q4.12 | 0x0400 |
| 0x05 | [4:0] delay tap, [8] edge swap | 0 |
| 0x06 | channel enables | 0xFFFF |
| 0x07 | [3:0] oscilloscope re-arm (self-clearing) | – |
| 0x08–0x0B | probe p: [4:0] source, [9:8] trigger type | 0 |
| 0x0C–0x0F | probe p trigger level | 0 |
| 0x10–0x13 | probe p post-trigger samples | 8192 |
| 0x14 | [13:0] scope read address, [15:14] probe | 0 |
| 0x15 | scope read data (RO) | – |
| 0x16 | [3:0] probes frozen (RO) | – |
| 0x17–0x1A | probe p address of oldest sample (RO) | – |
| 0x1B | inspection analog selects [4:0], [12:8] | a1 = 16 |
| 0x1C | inspection digital selects [5:0], [13:8] | d1 = 32 |
| 0x1D | events lost, all channels (RO) | – |

The PSA configuration is common to all 16 channels.

## Oscilloscope and inspection lines

`oscilloscope` has four probes. Each records a chosen 16-bit source into
its own 16384-word circular buffer at 200 MHz.

Sources:

- 0–15: raw samples of each channel;
- 16: the link word;
- 17: the trigger-request mask;
- 18: the event-start mask;
- 19: the buffer-ready mask.

Trigger types:

- 0: any trigger request;
- 1: source rises through the level;
- 2: source falls through the level;
- 3: software (immediate).

After the trigger a probe writes the trigger sample and `post` more
samples, then freezes. Software reads the buffer through registers
0x14/0x15, starting at the reported oldest address. Writing register 0x07
re-arms a probe.

`inspection_lines` drives two 14-bit DAC outputs and two digital outputs,
each through a registered multiplexer.

- Analog sources: 0–15 raw channels, 16 the link word.
- Digital sources: 0–15 trigger requests, 16–31 event starts, 32 a clk/2
  toggle, 33 link busy, 34 order-FIFO overflow.

## Departures and limits

- One full-rate sample stream per channel instead of half-rate even/odd
  streams. The bit order on the ADC lanes and on the 8 link lanes is
  assumed.
- The trigger condition (a threshold crossing above the running baseline)
  and the 2-sample gate lead are this design's. So are the 40-sample
  pre-trigger part of the capture window and the Q4.12 format of delta_t.
- The link framing, the readout packet format, the SPI frame and the
  register map are this design's. So are the queue depths (staging 4096,
  answers 64, trigger windows 64) and the 48-bit timestamp.
- A third pile-up pulse is dropped and counted. An event with no free
  buffer raises no trigger request.
- Not built: the FADC analog stage, the ADC and clock chips, the IODELAY
  and DDR primitives, the PowerPC system on the Virtex-5 (its SPI master to
  the Virtex-6 is built; the rest is represented by the `cfg_*` port), the PCIe
  end-point, the GTS tree and leaf, and the trigger processor board apart
  from its multiplicity algorithm.
- Crossings between clock domains are not modelled. Everything is on one
  200 MHz clock.

## Simulating

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb_neda_top` runs the
whole design at its default sizes, in well under a minute. It does the
following:

- drives 16 channels with neutron-like and gamma-like pulses, including a
  pile-up pair, a coincidence and a buffer overflow;
- acts as the GTS: it timestamps each request, runs the requests through
  `multiplicity_trigger`, and returns its verdicts;
- checks every packet in the readout FIFO against the injected pulse.

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/neda_pkg.sv tb/tb_neda_top.sv --top-module tb_neda_top
./obj_dir/Vtb_neda_top
```

`tb_rate_v6` is the rate test. It feeds all 16 channels with random
pulses, about 50 kHz of neutrons per channel, for 400 us. It checks:

- every request and every waveform on the link;
- the 254-clock spacing of events waiting for the link.

It reports the link occupancy and the events lost for lack of a buffer. A
few are lost in each run, as the link budget above predicts.

Use the same command for any other testbench, changing the name. Each
testbench computes its expected values itself. For example, the PSA
testbench works out the integrals and the decision from the samples it
drives. The top-level testbench builds the expected packets from the
waveforms it injected.
