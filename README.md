# PHAROS2 digital beamformer

A frequency-domain beamformer for a 24-element, single-polarisation phased
array feed. The 24 antenna signals are digitised and split into 512 frequency
channels. Of those, the 404 channels covering the 275 MHz analogue band are
kept. Each kept channel of each signal is multiplied by a complex weight, and
the weighted signals are summed into **four independent beams**. The beams
leave either as integrated power spectra or as one selectable raw voltage
beam, packed in SPEAD packets. For calibration, the raw channelized voltages
of up to 15 pairs of adjacent channels can also be recorded from every signal.

The hardware is one digitiser board with **two FPGAs running identical
firmware**. Each FPGA handles 12 signals and forms *partial beams* from them.
FPGA1 ships its partial beams to FPGA0 over the board's FPGA-to-FPGA (F2F)
bus. FPGA0 holds its own partial beams in a FIFO until FPGA1's arrive, then
adds the two, integrates or packs the result, and formats the packets. Most of
the subtlety of the design lies in this split: how the work is divided, how
the link is framed, and how the two halves meet again.

This RTL covers everything from the ADC sample alignment to the SPEAD packet
stream. It does **not** include the polyphase channelizer, the JESD204 ADC
receivers, or the UDP/IP/10 GbE stack. Where the channelizer sits, its ports
are brought out of the top (see *What is outside*).

## Block diagram

```
                 FPGA1 (fpga_id=1)                         FPGA0 (fpga_id=0)
 ADC 12..23 ─ input_align ─► algn_* ─► [channelizer]      ADC 0..11 ─ input_align ─► algn_* ─► [channelizer]
                                           │                                                     │
                        ch_valid/ch_tag/ch_smp[12..23]                         ch_valid/ch_tag/ch_smp[0..11]
                                           ▼                                                     ▼
                 4 × beamformer_engine                               4 × beamformer_engine
            (channel_select → coef_bank → cmult×12 → signal_sum)        │ partial beams, 4 × 16+16 bit
                                           │                             ▼
                                        f2f_tx ═ 36 lanes × 4 ═► f2f_rx ─► beam_sum (FIFO + add + requantise)
                                                                         │ 4 raw beams, 8+8 bit
                                                     ┌───────────────────┴──────────────────┐
                                          4 × beam_integrator                     raw_beam_packer (1 beam)
                                                integ_packer                               │
                                                     └──────── arbiter ─► spead_formatter ─► beam_out_*
                                         (raw_all) 3 × raw_beam_packer ─► 3 × spead_formatter ─► aux_out_*
 each FPGA:  channel stream ─► raw_capture ─► spead_formatter ─► raw_out_*[fpga]
```

| Module | Role |
|---|---|
| `pharos2_top` | The board: two `itpm_fpga` instances, the F2F bus (a register pipeline), signal routing and status. FPGA0's four output links are ports. |
| `itpm_fpga` | One FPGA's firmware. `fpga_id` selects the role: 1 sends partial beams, 0 receives, sums and outputs. |
| `input_align` | Per-signal programmable delay in whole samples, to compensate for differing cable lengths. |
| `beamformer_engine` | One beam on one FPGA: `channel_select`, `coef_bank`, 12 `cmult`, `signal_sum`, then scale and saturate. |
| `channel_select` | Keeps 404 contiguous channels from a programmable start channel and renumbers them from 0 to 403. |
| `coef_bank` | Double-buffered complex weight RAM, per signal and per channel. It switches banks at a frame start. |
| `cmult`, `signal_sum` | Pipelined complex multiply; full-precision sum over the 12 signals. |
| `f2f_tx`, `f2f_rx` | Serialise one partial-beam word (4 beams × 32 bits plus tag) onto 36 lanes as 4 beats in one clock (4:1 serialisers), and rebuild it. |
| `beam_sum` | FIFO for the local partial beams, paired addition with the remote ones, requantisation to 8+8 bits. |
| `beam_integrator` | Power spectrum (re² + im²) of one beam, accumulated over `int_frames` frames. |
| `integ_packer`, `raw_beam_packer` | Turn integrated spectra or one raw beam into heaps of 64-bit words. |
| `spead_formatter` | Puts a SPEAD header in front of each heap. |
| `raw_capture` | Records the raw channelized voltages of selected channel pairs. |
| `sync_fifo` | Generic first-word fall-through FIFO, used by several of the blocks above. |
| `pharos2_pkg` | Sizes, sample and coefficient types, and the stream tag. |

## The channel stream

All the beamforming logic runs on one stream per FPGA. On each clock with
`ch_valid` high, the stream carries **one frequency channel for all 12
signals**:

- `ch_tag.chan`: the channel number, 0 to 511.
- `ch_tag.sof`: high on channel 0, which marks the start of a spectrum ("frame").
- `ch_smp[s]`: the 8+8-bit complex sample of signal `s`.

A frame is one output spectrum of the filter bank. The channels are spaced
683.6 kHz apart and oversampled by 32/27, so each channel delivers 810.185 k
samples/s: one frame every 1.234 µs. Gaps between valid clocks are allowed.

A channel may arrive on **every clock**. Everything downstream, the F2F link
included, keeps up with one kept channel per clock. The one limit at that rate
is on integrated output: integrations must be at least 4 frames long (see
below).

After `channel_select`, channels are renumbered from 0 to 403. `sof` moves to
the first kept channel. From there on, all tags are in this kept numbering.

## Forming a partial beam

For each beam `b`, signal `s` and kept channel `c`, the engine computes

```
partial[b][c] = sat16( ( Σ_s  x[s][c] · w[b][s][c] ) >>> 10 )
```

- `x`: 8+8-bit complex samples.
- `w`: 16+16-bit complex weights, where 1.0 is 2¹⁴.
- The sum: 12 complex products kept at full precision (29 bits).
- The result: 16+16 bits, saturated.

So a single signal at unity weight comes out as 16 times its input value. That
leaves 4 bits of headroom for the 12-signal sum before saturation.

The pipeline is:

| Stage | Clocks |
|---|---|
| channel select | 1 |
| coefficient read | 1 |
| multiply | 2 |
| sum | 1 |
| scale and saturate | 1 |

The partial beam of a channel leaves **6 clocks** after the channel entered.
The four engines run in lock-step, so their outputs form one word:
`pbeam_word_t` = tag + 4 × 32 bits.

**Weights** are written through `coef_wr_*` into the inactive bank of
`coef_bank`, addressed by FPGA, beam, signal and kept channel. A pulse on
`coef_swap` makes every engine switch to the new bank at its next frame start.
`coef_swap_pending` stays high until it has done so. A spectrum is therefore
never formed with a mix of old and new weights.

## The F2F link and the meeting of the two halves

A partial-beam word is 4 × 32 bits of beams plus a 10-bit tag. `f2f_tx` sends
it as **4 beats on the 36 lanes**. All four beats leave in the same clock: each
lane is driven through a 4:1 serialiser (`F2F_SER` = 4), so the port is 4 × 36
bits wide and the lanes run at 4 times the clock rate. A word may be sent on
every clock. Beat `k` is:

| Lanes | Beat `k` (0..3) |
|---|---|
| 31..0 | beam `k`, re in bits 31..16, im in 15..0 |
| 32 | 1 on beat 0 (start of word), else 0 |
| 35..33 | tag piece: chan[2:0], chan[5:3], chan[8:6], then {0, 0, sof} |

`f2f_rx` rebuilds the word and raises `out_valid` one clock after the beats
arrive. From `f2f_tx`'s input to `f2f_rx`'s output takes 2 clocks plus the
link delay. A beat set that has no start marker on beat 0 but is not idle, or
has a start marker on any other beat, sets the sticky `err_f2f_frame` flag.
Lane deskew and word alignment of the physical link are left to the
serialisers. In FPGA0's role the F2F transmitter is idle; in FPGA1's role the
receiver and the beam sum are unused, because both FPGAs carry the same logic.
In the top, the bus is `F2F_DELAY` (8) register stages. That stands in for
whatever latency the real link has.

The **partial-beam FIFO** in `beam_sum` makes the two halves meet correctly:

1. Every word made by FPGA0's own engines is pushed into the FIFO.
2. Every word arriving from FPGA1 pops the oldest local word.
3. The two words are added beam by beam.
4. The sum (17 bits) is shifted right by `out_shift` and saturated to 8+8 bits.

Both FPGAs see the channel streams at the same time. The FIFO level therefore
settles at the link latency in words (`pb_fifo_level`). A FIFO of 64 words
covers far more latency than the link model needs.

Three sticky flags report a broken pairing:

- `err_misalign`: the two tags differ.
- `err_fifo`: the FIFO overflowed, or a remote word arrived with nothing to
  pair it with.
- `beam_sat[b]`: a final beam sample clipped (this flag is not sticky).

## Integration and the two output modes

Each of the four final beams has a `beam_integrator`. It squares the beam,
`p = re² + im²`, and adds `p` into a 32-bit saturating accumulator per channel
(a 512 × 32-bit RAM).

- The first frame of an integration writes into the accumulator instead of
  adding to it.
- In the last frame the sum is sent on `dump_*` instead of being written back.
  It appears 2 clocks after its sample.
- The integration length `int_frames` (1 to 2²¹−1 frames, 0 acts as 1) is
  sampled at the start of each integration.

The instrument needs integrations of 50 µs to 1 s, and 1.28 s was used in
testing: 41 to 1,037,037 frames. That is just within 20 bits; 21 bits leave
margin for a faster spectrum rate. A full-scale input adds at most 2¹⁵
per frame, so the accumulator can saturate after 131,072 frames of full-scale
signal. Ordinary noise levels are far below that.

When channels arrive on every clock, **integrations must be at least 4 frames
long**. `integ_packer` sends 2 channels per 64-bit word and spends 2 clocks
per word, so the four spectra of an integration take about 1,650 clocks to
leave, against 512 clocks per frame. The instrument's shortest integration
(41 frames) is far above this limit.

`out_mode` selects what FPGA0 delivers. It is sampled at each frame start, so
a mode change never splits a frame:

- **Integrated** (`OUT_INTEGRATED`): `integ_packer` buffers each dumped
  spectrum and sends one heap per beam and integration. Each heap is 202 words
  of two channels, even channel in the upper 32 bits.
- **Raw beam** (`OUT_RAW_BEAM`): `raw_beam_packer` packs the beam chosen by
  `raw_beam_sel`. It sends one heap per frame of 101 words, four channels per
  word: channel 4k in bits 63..48, each as re:im.

One 10 GbE link carries one raw beam comfortably: about 6 Gb/s of data. It
cannot carry four. With `raw_all` set in raw-beam mode, three more packers
and formatters send the other beams on the further links. Link k (1..3,
ports `aux_out_*`) carries beam `raw_beam_sel + k` mod 4. With `raw_all`
clear, only the first link is used.

The integrators keep running in both modes. Only the packet source changes. A
small arbiter passes whole packets from either packer to the one
`spead_formatter` behind `beam_out_*`. The output port is a valid/ready
stream, and `beam_out_last` marks the last word of a packet.

## SPEAD packets

`spead_formatter` sends a 7-word SPEAD-64-48 header and then the heap payload.
Each heap fits in one packet, and each item is immediate-addressed:

| Word | Value |
|---|---|
| 0 | `0x5304_0206_0000_0006`: magic, version, 2-byte item id, 6-byte address, 6 items |
| 1 | `0x8001` · heap counter |
| 2 | `0x8002` · heap size in bytes |
| 3 | `0x8003` · heap offset (0) |
| 4 | `0x8004` · payload length in bytes |
| 5 | `0x9600` · frame or integration number |
| 6 | `0x9011` · {kind, index}: kind 1 = integrated spectrum, 2 = raw beam, 3 = raw channel capture; index = beam or FPGA |

The heap counters are:

- integrated spectra: {integration count, beam}
- raw beams: the frame count
- raw captures: the frame number within the recording

Only the SPEAD layer is built. The UDP/IP headers and the 10 GbE MAC that carry
these packets are not part of this RTL.

## Raw channel capture

Calibration needs the raw channelized voltages of every antenna. Each FPGA has
a `raw_capture` block that taps its channel stream before channel selection.
It is set up as follows:

- `cap_pairs` (1 to 15) pairs of adjacent channels.
- `cap_pair_start[i]` gives the first channel of pair `i`. The pairs must be in
  ascending order and must not overlap.
- `cap_frames` is the recording length in frames. 0 means record until
  `cap_stop`; a stop completes the frame under way.

A `cap_start` pulse arms the block, and recording begins at the next frame
start. For each selected channel, the 12 signals × 16 bits make 192 bits, sent
as 3 payload words, signal 0 first. Each frame of the recording becomes one
heap of 6 × `cap_pairs` words, kind 3, index = FPGA. `cap_busy` is high while
recording. The two FPGAs' captures leave on `raw_out_*[0]` and `raw_out_*[1]`.

## Sizes and parameters

Shared sizes are in `pharos2_pkg`. The top parameters are:

| Parameter | Default | Meaning |
|---|---|---|
| `MAX_DELAY` | 64 | Alignment delay range, in samples |
| `FIFO_DEPTH` | 64 | Partial-beam FIFO, in channel words |
| `F2F_DELAY` | 8 | Register stages standing in for the F2F bus |
| `INT_W` | 21 | Width of the integration length, in frames |

Fixed sizes:

| Size | Value |
|---|---|
| Signals | 24, 12 per FPGA |
| Beams | 4 |
| Channels | 512, of which 404 kept |
| ADC samples | 8 bits |
| Channel samples | 8+8 bits |
| Weights | 16+16 bits, 1.0 = 2¹⁴ |
| Partial beams | 16+16 bits |
| Final beams | 8+8 bits |
| Power | 32 bits |
| Capture pairs | up to 15 |
| F2F lanes | 36, 4:1 serialised |

Synthesised at the defaults, the top has about 19,000 flip-flops and 3.4 Mbit
of RAM. The RAM is mostly weights and integration accumulators. The full
size is built; nothing is scaled down.

## Where this design makes its own choices

The architecture, the signal counts, channel counts, beam count, bit widths of
samples, raw beams and power spectra, and the capture pair scheme follow the
published description of the instrument. These are this design's own choices:

- Weight format, partial-beam width, and all scaling and saturation rules.
- The F2F beat format and the link latency model.
- The packing of channels into 64-bit words, and the SPEAD items 0x9600 and
  0x9011.
- Control through plain ports. The real board uses a register bus behind a
  UDP control protocol.
- Mode changes and weight swaps take effect at frame boundaries.
- Raw captures from FPGA1 leave on their own stream. The mapping of raw beams to
  output links is also this design's own.
- The F2F link moves one word per clock through 4:1 serialisers. At the full
  data rate (404 kept channels per 1.234 µs frame) a lane then runs at 1.31
  Gb/s, within the link's 1.6 Gb/s per lane. The processing clock must be at
  least 415 MHz to stream all 512 channels in one frame time (331 MHz if only
  the kept channels were streamed). The published description gives no clock
  rates.

## What is outside

- **Channelizer.** An oversampled polyphase filter bank with 512 channels. In
  the top, aligned ADC samples leave on `algn_valid` and `algn_smp` (one
  stream per FPGA); channelized streams enter on `ch_valid`, `ch_tag` and
  `ch_smp`.
- **JESD204 ADC receivers and the ADCs.** The top takes 8-bit samples directly.
- **10 GbE / UDP.** The packet streams are 64-bit valid/ready streams.
- **Board control.** The board's control CPLD, clocking, and the test signal
  generator.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_pharos2_top` | The whole board at its default sizes, against a bit-exact model in the testbench. Details below. |
| `tb_lab_tests` | The classic bench tests of a beamformer, on the whole board at its default sizes. A tone reaches all 24 inputs with a 90° phase step from input to input. The four beams get one input at 1 + j0, all inputs uncorrected, 6 in-phase inputs, and all inputs with phase-correcting weights. The tone powers must be exactly 16, 0, 576 and 9216 per frame, over integrations of 4 and 8 frames, with one channel per clock. |
| `tb_itpm_fpga` | One FPGA in the FPGA1 role. Partial beams are decoded from the lanes and checked; it also checks one raw capture heap. |
| `tb_f2f` | Transmitter and receiver back to back, with words on every clock and in gaps, the 4-clock latency through two link stages, and the frame error on a corrupted beat. |
| `tb_beamformer_engine` | Random weights, a weight swap, saturation, and the 6-clock latency. |
| `tb_beam_sum` | Pairing across a variable link delay, and saturation. |
| `tb_beam_integrator` | Integration lengths, length changes, and 32-bit saturation. |
| `tb_input_align`, `tb_channel_select`, `tb_coef_bank`, `tb_cmult`, `tb_signal_sum`, `tb_sync_fifo`, `tb_spead_formatter`, `tb_integ_packer`, `tb_raw_beam_packer`, `tb_raw_capture` | The individual blocks. |

`tb_pharos2_top` runs 8 frames through both FPGAs and exercises:

- two weight sets and two swaps
- the partial-beam FIFO waiting on the link
- switches from integrated to raw and back
- integrated, raw-beam and capture heaps
- saturation of the final beams
- all four raw beams over the four output links, in one frame
- the ADC alignment delays

Every packet word is compared with the model. The test counts each mechanism
and fails if one never happened.

To run a testbench with plain Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/pharos2_pkg.sv tb/tb_pharos2_top.sv --top-module tb_pharos2_top
./obj_dir/Vtb_pharos2_top
```

(`-Wno-fatal` keeps Verilator's width warnings from stopping the build.) Replace the testbench name to run another. The full-size top test takes well
under a second. To change sizes, edit the top parameters or the constants in
`pharos2_pkg`. Channel and beam counts appear in the F2F beat format, and
`f2f_tx` checks them at elaboration.
