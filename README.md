# Real-time spectral probe: FPGA fronthaul datapath

A spectral probe for a smart-city sensor network. It digitises up to 100 MHz of
radio spectrum anywhere between roughly 0.3 and 6 GHz and ships the raw IQ
samples, in real time, over a 10 Gbit/s optical link to a central server. The
server then does the signal processing (filtering, FFT, energy detection).
Several probes can be spread across a city and fed into one server.

The probe is an RF transceiver (14-bit ADCs at 122.88 Msps, samples carried as
16-bit I and Q) on an FPGA board. The fronthaul is Radio over Ethernet: IQ
samples travel as eCPRI messages in plain Layer-2 Ethernet frames, with no IP
or UDP. This repository holds the FPGA logic between the transceiver's sample
interface and the Ethernet MAC. That logic does four things:

* packs samples into 64-bit AXI4-Stream beats;
* frames them into 8134-byte eCPRI/Ethernet frames;
* moves them between the converter and network clock domains;
* on the return path, checks and unpacks received frames for the transmit
  converter (DAC) and for a built-in data checker.

## Data flow

```
 converter domain, adc_clk 122.88 MHz                    | Ethernet domain, eth_clk 156.25 MHz
                                                         |
 adc_i/q ──┬─> iq_pack ───────────────────┐ mode 0       |
           │                              │              |
           └─> upsample2 ─> fir_interp ─┬─┤ mode 1       |
                                        │ │              |
               data_gen ────────────────┼─┤ mode 2       |
                                        │ v              |
                                        │ async_fifo ────┼─> ecpri_framer ───> tx_* (to MAC)
                                        │ (tx)           |
                             dac_sel=1  │                |
 dac_data <──── mux <───────────────────┘                |
                 ^                                       |
                 └── async_fifo (rx) <───────────────────┼── ecpri_deframer <── rx_* (from MAC)
                          └─> data_sink                  |
```

`spectral_probe_top` instantiates all of the above. Its ports are plain
signals:

* the converter-side sample strobes;
* one AXI4-Stream pair for each direction of the MAC;
* configuration inputs: `mode`, `dac_sel`, the MAC addresses and `PC_ID`;
* status counters.

## Operating modes and rates

| `mode` | source | beat contents | line rate | frame period |
|---|---|---|---|---|
| 0 Standard (default) | `iq_pack` | two consecutive ADC samples | 3.93 Gbit/s | every 2028 samples = 16.5 µs |
| 1 Loopback | `upsample2` + `fir_interp` | two samples at 245.76 Msps | 7.86 Gbit/s | every 1014 samples = 8.25 µs |
| 2 Data Gen | `data_gen` | two words of a 32-bit LFSR sequence | 7.86 Gbit/s | every 1014 samples |

Standard mode is the probe's normal configuration. The ADC produces one 32-bit
sample per clock, so a 64-bit beat is ready only every second clock.

Loopback mode is for testing the link end to end. The transceiver's DAC runs at
twice the ADC rate, so the received stream is upsampled by 2 and
interpolation-filtered. The result can do two things:

* go straight to the DAC (`dac_sel = 1`, the internal loopback);
* go out over the fibre and come back through the deframer to the DAC
  (`dac_sel = 0`).

Data Gen mode sends a known pattern through the same path, so `data_sink` can
check every bit that comes back.

A frame takes 1017 beats, plus one idle cycle, at 156.25 MHz. That is
6.5 µs, so the framer keeps up with both rates. The 64-bit × 156.25 MHz
link carries 10 Gbit/s.

`mode` and `dac_sel` are configuration inputs, set by the processor between
streams. They are used without synchronisers. To switch cleanly, stop the
stream (or send a whole number of payloads) and let the FIFOs drain. A partial
payload left in the transmit FIFO would otherwise be sent in the next frame
together with data from the new source.

## The eCPRI frame and its 6-byte offset

This is the part that needs the most care. The framer (`ecpri_framer`) emits
the frame below, with byte *n* of the frame in `tdata` lane *n* mod 8 (lane 0
= bits [7:0]):

| bytes | field | value |
|---|---|---|
| 0–5 | destination address | `dst_mac`, most significant byte first |
| 6–11 | source address | `src_mac` |
| 12–13 | EtherType | `0xAEFE` (eCPRI) |
| 14 | eCPRI revision / C bit | `0x10` (revision 1, single message) |
| 15 | message type | `0x00` (IQ data) |
| 16–17 | eCPRI payload size | `PAYLOAD_BYTES + 4` = 8116 |
| 18–19 | PC_ID | `pc_id` |
| 20 | SEQ_ID | frame counter, modulo 256 |
| 21 | E bit / sub-sequence | `0x80` |
| 22 – 8133 | IQ payload | 2028 samples: I then Q, each most significant byte first |

The header is 22 bytes, which is not a multiple of 8. So the payload starts
6 bytes into the third beat, and every payload word is split across two beats:

```
beat 2       : [hdr16..hdr21 | w0.b0 w0.b1]
beat 2+j     : [w(j-1).b2..b7 | wj.b0 wj.b1]
beat 1016    : [w1013.b2..b7 | -- --]        tkeep = 8'h3F, tlast
```

Here `wj.bk` is byte *k* of payload word *j* in network order. The framer
keeps a 6-byte residue register: each beat is the residue plus the first two
bytes of the next word. The deframer reverses this by keeping the upper two
bytes of each beat.

The byte swap between fabric order (little-endian 16-bit components) and
network order is `probe_pkg::swap16_lanes`. It is applied on both sides, so
the server receives big-endian components.

The framer starts a frame only when the transmit FIFO already holds a whole
payload (1014 beats). Once a frame has begun it cannot run dry, which an
Ethernet MAC would treat as an underrun. `m_tready` back-pressure can stall a
frame at any beat, and an assertion checks that a stalled beat does not
change.

The deframer checks the following:

* the EtherType, revision and message type in the second beat. A frame that
  fails is dropped whole and counted in `rx_frames_bad`.
* the size field, the frame length and the final `tkeep`. These are checked at
  the end of the frame. A frame that fails is counted bad, but its payload has
  already been forwarded.
* `SEQ_ID` continuity. After the first good frame, any SEQ_ID that is not the
  previous one plus 1 increments `rx_seq_errors`. This catches lost and
  reordered frames; nothing is re-sequenced.

## Interpolation filter

`fir_interp` is a 200-tap low-pass FIR filter on the zero-stuffed 245.76 Msps
stream. Each beat carries two samples, and each clock it computes both new
outputs for I and Q, in direct form. The coefficients are computed when the
design is elaborated, by a constant function:

    h[n] = 2 · wc · sinc(wc · (n − 99.5)) · I0(β·sqrt(1 − (2n/199 − 1)²)) / I0(β)
    wc = 2 · 50 / 245.76,   β = 3.5

The coefficients are then scaled so that the DC gain is 2, and rounded to
Q2.16 in 18 bits. A gain of 2 gives each output sample the amplitude of the
input, because zero insertion halved it. Outputs are rounded half up and
saturated to 16 bits.

The passband edge is 50 MHz, one-sided, which is the 100 MHz receiver
bandwidth. Images of the 122.88 Msps input start at 72.9 MHz and are
attenuated. A tone at 61.44 MHz comes out at about 0.14 % of its input amplitude (-57 dB).
Changing `TAPS`, `CUTOFF_MHZ` or `KAISER_BETA` redesigns the filter.

The sum is pipelined in two register stages:

1. The first stage adds up groups of `GROUP` = 8 consecutive taps. That is
   8 multiplies and their adds, the size of a DSP-slice cascade.
2. The second stage adds the 25 partial sums, then rounds and saturates.

The filter's latency is 2 clocks. From ADC sample to DAC word in the internal
loopback it is a constant 5 converter clocks. The filter does not exploit the
inserted zeros or the coefficient symmetry. A polyphase form would halve the
multipliers, and a folded one would halve them again; both are possible
optimisations.

## Clock domains

There are two clocks: `adc_clk` (122.88 MHz, from the transceiver) and
`eth_clk` (156.25 MHz, from the Ethernet subsystem). Two `async_fifo`
instances cross between them. The FIFO works as follows:

* the read and write pointers are passed between the domains in Gray code,
  through two-flop synchronisers;
* the read side is first-word-fall-through;
* each side reports its own occupancy, and the framer uses the read-side count
  for its start rule.

Both FIFOs default to 2048 × 64 bits, which is two payloads.

A word that arrives when a FIFO is full is dropped. Drops are counted in
`tx_overflows` (transmit FIFO, counted in the converter domain) and
`rx_overflows` (receive FIFO, counted in the Ethernet domain). The receive
FIFO is popped whenever it is not empty, so the DAC sees bursts of one frame
at a time.

## Outside this RTL

These parts of the probe are not logic designed here. The top brings their
connections out as ports:

* **RF transceiver.** It contains the ADCs and DACs, the JESD204B serial link
  and its drivers. It appears in the design as `adc_*` and `dac_*` sample
  ports.
* **10G Ethernet MAC/PCS and SFP+ optics.** They appear as the `tx_*` and
  `rx_*` AXI4-Stream ports. The testbench models the fibre loopback as a
  wire, which can drop or corrupt chosen frames.
* **Other analogue parts:** LNA, antenna and reference clock generator.
* **Software:** the embedded Linux on the board's Arm cores (transceiver
  configuration and remote control), and all server software (raw-socket
  capture, byte reordering, SIMD FIR filtering, FFT, power estimation).

## Design choices

The document this design follows gives some parts in detail and leaves others
open.

Taken from the document:

* the two designs (Standard and Loopback), their rates and clocks;
* the 8112-byte payload and 8134-byte frame;
* the presence of PC_ID and SEQ_ID;
* big-endian components on the wire;
* the 200-tap interpolation filter with a 100 MHz band;
* the Kaiser window with β = 3.5;
* the Data Gen/Sink pair.

Choices made here:

* **One top for both designs.** They sit in one top with a run-time `mode`.
  The document built them as separate bitstreams.
* **Header field encodings.** Taken from the eCPRI format: revision 1, message
  type 0, the size field, and a SEQ_ID with the E bit set.
* **FIFOs.** The CDC FIFO is also used in Standard mode. It is built the
  standard way with Gray pointers, and both FIFOs are 2048 deep.
* **Frame start rule.** A frame starts only when a whole payload is buffered.
* **Upsampling.** The factor-2 upsampler inserts zeros, and the filter
  coefficients are this design's own.
* **Test pattern.** The LFSR pattern, and a checker that resynchronises itself
  after a gap.
* **Resets.** All resets are synchronous and active low.
* **Where the DAC runs.** The DAC output is driven in the converter clock
  domain, two samples per beat. The internal loopback (`dac_sel = 1`) takes
  the filter output directly, without a FIFO. Frames returned over the fibre
  reach the DAC through the receive FIFO.
* **No re-sequencing.** Sequence errors and malformed frames are counted, not
  repaired.

## Simulating

Every file in `rtl/` and `tb/` holds one module or package. Testbenches print
`TB_RESULT checks=N failures=M` and stop. Run them from the repository root
with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/probe_pkg.sv tb/tb_spectral_probe_top.sv --top-module tb_spectral_probe_top
./obj_dir/Vtb_spectral_probe_top
```

Substitute any other `tb/tb_<block>.sv`. Lint a single module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/probe_pkg.sv rtl/<module>.sv`.

| testbench | what it establishes |
|---|---|
| `tb_spectral_probe_top` | Full size, default parameters, end to end (runs in about two seconds). It checks three things. (1) Standard mode, ten frames, i.e. one 20280-sample capture: payloads and DAC words match the ADC samples, and the frame period is 2028 clocks. (2) Loopback mode with internal loopback: DAC and payloads match a reference filter, and the frame period is 1014 clocks. (3) Data Gen mode, with one frame dropped and one corrupted on the wire: the checker reports exactly those two gaps, the deframer reports 2 SEQ_ID errors and 1 rejected frame; 250 further frames take SEQ_ID through its wrap from 255 to 0 without an error. It then forces a transmit-FIFO overflow. It requires each mechanism to happen at least once: mode switch, MAC stall, SEQ_ID gap, SEQ_ID wrap, frame rejection, overflow. |
| `tb_ecpri_framer` | Parses 5 full-size frames byte by byte. Checks the start rule and the 1017-cycle frame length, with random back-pressure. |
| `tb_ecpri_deframer` | Feeds frames built in the testbench. Covers a sequence gap, a foreign EtherType, a truncated frame and recovery. |
| `tb_fir_interp` | Bit-exact comparison with a reference filter designed independently in the testbench. Also checks DC gain and image rejection. |
| `tb_async_fifo` | Unrelated clocks, fill and drain phases, order, bounds and latency. |
| `tb_iq_pack`, `tb_upsample2`, `tb_data_gen`, `tb_data_sink` | Lane order, latency, sequence and error counting. |

Limits of what has been verified:

* Only behaviour in simulation has been verified. Timing closure at
  122.88 MHz and 156.25 MHz on a particular FPGA has not been attempted.
* The header byte layout matches the eCPRI format as described above. It has
  not been checked against a particular commercial RoE core or server
  application.
