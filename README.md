# TIE-RLE: transition inversion + run-length coding of ECG samples

Battery-powered ECG sensors spend most of their energy on the radio, so the
fewer bits they send, the longer they run. This design is a small, lossless
coder for one ECG channel. It works in two steps:

1. **Transition inversion.** Each byte of a 16-bit sample is checked for
   level changes between neighbouring bits. If the byte has many, every
   second bit is inverted, which swaps changes and non-changes, so the byte
   then has few. A decision bit sent with the byte tells the receiver
   whether this happened.
2. **Run-length coding.** The frame is rewritten so that a '1' marks a level
   change. After step 1 such a frame is mostly zeros. The lengths of the
   zero runs are sent as Golomb-Rice code words with m = 4.

The receive side undoes both steps and returns the original samples bit for
bit. Transmit and receive sides are in one top module, `tie_rle_top`. They
share only the clock and reset, and a serial link (or a loopback) joins
them.

```
 ecg_sample1[15:0]
      |
 ecg_sample_reg ──► e1: tic_encoder (bits 15:8) ──┐  {dec1, byte1', dec2, byte2'}
                └─► e2: tic_encoder (bits  7:0) ──┴─► xor_diff ─► serializer ─► gr_rle_encoder ─► comp_bit
                                                     (18 bits)    (MSB first)    (Rice, m = 4)

 rx_bit ─► gr_rle_decoder ─► deserializer ─► xor_undiff ─► d1/d2: tic_decoder ─► sample_out[15:0]
```

## Transition inversion (`transition_counter`, `b2inv`, `tic_encoder`, `tic_decoder`)

An 8-bit word has 7 neighbouring bit pairs. `transition_counter` counts the
pairs that differ: t, from 0 to 7. If every second bit of the word (bits 1,
3, 5, 7) is inverted, each of those pairs changes state: a differing pair
becomes equal and an equal pair becomes different. The inverted word
therefore has 7 − t transitions. `b2inv` does this inversion. It is its own
inverse, so the encoder and the decoder use the same block.

`tic_encoder` inverts a word when t > THRESHOLD. The default is 3, so no word
leaves with more than 3 transitions. It works in two register stages:

| clock | stage 1 ("buffer", "check transitions")  | stage 2 ("encoder", "add decision bit")           |
|-------|------------------------------------------|---------------------------------------------------|
| n     | register the word and its count t        |                                                   |
| n+1   |                                          | `dec = t > THRESHOLD`; register the word, inverted when `dec` is set, with `dec` and `sel` |

The latency is 2 clocks and the encoder takes one word per clock. `sel[1:0]`
is the range of the transition count (t = 0–1, 2–3, 4–5, 6–7, that is
`t[2:1]`). The top brings it out as `encode_range1` and `encode_range2`. With
the default threshold, `dec` equals `sel[1]`.

`tic_decoder` registers the received word with its decision bit, then
inverts the odd bits back when the decision bit is set. Its latency is also
2 clocks.

Example: the byte `0101_0101` has 7 transitions. It leaves as `0000_0000`
with dec = 1.

## From transitions to zero runs (`xor_diff`, `xor_undiff`)

The two encoded bytes and their decision bits form an 18-bit frame:

```
 bit 17   16..9    8     7..0
 dec1     byte1'   dec2  byte2'
```

`xor_diff` replaces every bit except the MSB with the XOR of that bit and
the bit above it (`diff = frame ^ (frame >> 1)`). A '1' now marks a level
change in the serial stream. Step 1 keeps these changes few, so the frame
holds long runs of zeros. `xor_undiff` rebuilds the frame from the MSB down
(`word[i] = diff[i] ^ word[i+1]`). Both blocks are combinational.

## The Rice run-length code (`gr_rle_encoder`, `gr_rle_decoder`)

The serializer sends the 18-bit transition-form frame MSB first.
`gr_rle_encoder` counts the zeros in front of each '1'. That '1' ends the
run, and the run length r goes out as a Golomb-Rice code word with
m = 2^K = 4:

* q = r >> 2, sent as q '1's followed by a '0';
* then the 2 low bits of r, MSB first.

| data bits  | r | code word |
|------------|---|-----------|
| `1`        | 0 | `0 00`    |
| `01`       | 1 | `0 01`    |
| `001`      | 2 | `0 10`    |
| `0001`     | 3 | `0 11`    |
| `00001`    | 4 | `10 00`   |
| `0000001`  | 6 | `10 10`   |

**Frame ends.** A frame may end with a run that no '1' has closed yet. The
encoder sends that run as if a '1' followed it: r counts the frame's last
zero. The decoder knows the frame length (`FRAME_BITS = 18`). It stops after
18 bits and drops the extra '1'. So every frame ends on a code-word
boundary, and a receiver can start decoding at any frame.

**Timing.** While it is counting, the encoder takes one input bit per clock.
When a run closes, it drops `in_ready` and sends the q + 3 bits of the code
word, one bit per accepted transfer (`out_valid && out_ready`). Then it goes
back to counting. The decoder reads a code word one bit per clock. It then
sends r zeros and the closing '1', one bit per clock, and takes no input
meanwhile. Its output has no backpressure, because the deserializer always
accepts.

## Interface and timing of `tie_rle_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | clock; synchronous, active-high reset |
| `ecg_sample1` | in | 16 | sample to send; taken when `sample_valid && sample_ready` |
| `sample_valid` / `sample_ready` | in / out | 1 | sample handshake |
| `encoded_out` | out | 16 | the two inverted bytes `{byte1', byte2'}` |
| `encode_range1`, `encode_range2` | out | 2 | transition-count range of each byte |
| `decision_out` | out | 2 | `{dec1, dec2}` |
| `encoded_valid` | out | 1 | pulses when the four outputs above are new: 3 clocks after the sample was taken |
| `comp_bit` / `comp_valid` / `comp_ready` | out / out / in | 1 | compressed stream, valid/ready |
| `rx_bit` / `rx_valid` / `rx_ready` | in / in / out | 1 | compressed stream into the receiver, valid/ready |
| `sample_out` / `sample_out_valid` | out | 16 / 1 | decoded sample, one-clock pulse |

Only one sample is in the parallel part of the transmitter at a time. A new
sample is accepted once the previous frame has been loaded into the
serializer and the serializer is empty again. The transmitter needs 18
clocks to take in the frame's bits, plus one clock per code bit. On the test
record below, with no stalls, it takes about 37 clocks per sample. Each
stage's latency is fixed: register 1 clock, encoders 2, serializer and Rice
coder as described above, decoders 2.

Parameters: `SAMPLE_W` (16; each encoder gets `SAMPLE_W/2` bits), `GR_K` (2,
so m = 4) and `THRESHOLD` (3). Frame width and run-counter width follow from
them.

## How well it compresses

The end-to-end testbench sends 1000 synthetic samples. They model a baseline
near 7800 LSB with slow wander, up to 400 LSB of noise, and a Q-R-S spike
every 250 samples. Rice coding gives:

| what is run-length coded                         | m = 4 (default) | m = 2 (`GR_K = 1`) |
|--------------------------------------------------|-----------------|--------------------|
| raw samples (16,000 bits), no inversion          | 24,919          | 19,252             |
| inverted frames, without the XOR network         | 27,918          | 21,680             |
| inverted frames in transition form (this design) | 18,443 (115 %)  | 16,528 (103 %)     |

The percentages are relative to the raw 16,000 bits. Inversion and
transition form together cut the run-length coder's output by about 26 %
(m = 4) or 14 % (m = 2) compared with coding the raw samples. Because the
runs are short, m = 2 suits this data better than the default m = 4. On this record the output is
still larger than the raw data. The low byte of a noisy sample is close to
random, and no lossless coder can shrink random bits. Smoother signals, or
fewer significant bits per sample, compress better. Treat the numbers as a
property of this test data, not as a figure of merit.

## Where this design makes its own choices

The following follow the original description: the 16-bit sample register,
the two 8-bit encoders with their `out` and `sel` pins, the inversion
controlled by a transition count and a threshold, the decision bit added to
every word, an XOR network after the encoders, and run-length coding of
zero runs with a Golomb-Rice parameter m = 2^2 = 4. The following are this
design's own, because the description leaves them open:

* which bits are inverted (odd positions) and the threshold (3);
* the meaning of `sel` (transition-count range);
* the wiring of the XOR network (neighbour XOR, MSB kept);
* the frame layout and its bit order;
* the exact Rice code-word layout and the rule for a run left open at a
  frame end;
* all handshakes, the stage split and the latencies;
* the whole receive side's run-length decoder.

Transitions are counted inside a word only. The boundary with the previous
word on the serial line is not counted.

The encoders work on parallel bytes, and the frame is serialised after
them. A bit-serial encoder that buffers the word while it counts gives the
same stream.

The original register-level view of this coder shows a 4-bit compressed
output driven by a network of XOR gates. Its wiring cannot be recovered.
Here the compressed data leaves as a serial stream (`comp_bit`) instead.

Not included:

* **Phase-embedded decision bit.** The original scheme can carry the
  decision bit in the phase of the serial signal instead of sending it as a
  bit. That needs a phase encoder and a phase detector at the link level.
  Here the decision bit travels as an ordinary bit with each word, and
  `decision_out` brings it out for such an encoder.
* **Dictionary and bit-mask stage.** A dictionary and bit-mask compression
  stage ahead of the run-length coder is mentioned, but its dictionary and
  mask formats are not defined, so it is not included.

## Files

| file | contents |
|------|----------|
| `rtl/tie_rle_pkg.sv` | default sizes |
| `rtl/tie_rle_top.sv` | top: transmit and receive sides |
| `rtl/transition_counter.sv`, `rtl/b2inv.sv` | transition count; odd-bit inversion |
| `rtl/tic_encoder.sv`, `rtl/tic_decoder.sv` | transition inversion encoder and decoder |
| `rtl/xor_diff.sv`, `rtl/xor_undiff.sv` | transition form and its inverse |
| `rtl/serializer.sv`, `rtl/deserializer.sv` | parallel/serial conversion |
| `rtl/gr_rle_encoder.sv`, `rtl/gr_rle_decoder.sv` | Rice run-length coder and decoder |
| `tb/tb_ref_pkg.sv` | reference models shared by the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench is self-checking and ends with
`TB_RESULT checks=<n> failures=<m>`. A watchdog ends a run that hangs and
counts it as a failure. For example, from the top of the repository:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_tie_rle_top \
    rtl/tie_rle_pkg.sv tb/tb_ref_pkg.sv tb/tb_tie_rle_top.sv
./obj_dir/Vtb_tie_rle_top
```

Replace `tie_rle_top` with any module name to run that module's testbench.
`-Irtl -Itb` lets verilator find the submodules.

What the testbenches check:

* `transition_counter` and `b2inv`: exhaustively, all 256 bytes. For
  `b2inv` this includes the 7 − t property and that a second pass restores
  the byte.
* `xor_diff` and `xor_undiff`: 2000 random frames each.
* `tic_encoder` and `tic_decoder`: random words with gaps; the outputs and
  the exact 2-clock latency.
* `serializer` and `deserializer`: bit order, `bit_last` and word
  boundaries, under random stalls.
* `gr_rle_encoder` and `gr_rle_decoder`: 600 random frames of varying
  density against a reference Rice coder. This includes all-zero and
  all-one frames, frames ending in '0' and in '1', and code words with a
  non-zero quotient. The encoder test also runs the five-run example of
  the code table above, checked against the code words written out by
  hand.
* `tie_rle_top`: the 1000-sample record end to end at the default sizes,
  with random stalls on the sample input and on both ends of the link. It
  checks every encoder output and its 3-clock latency, every compressed bit
  and every decoded sample. It counts each mechanism (inversion in each
  encoder, plain words, quotient code words, both kinds of frame end,
  stalls and gaps) and fails if any of them never happens. It runs in well
  under a second. `tb_tie_rle_top_m2` runs the same test with `GR_K = 1`
  (m = 2).

The RTL uses `always_ff`/`always_comb`, typed parameters and an enum for
each run-length state machine. It has no memories and no vendor parts.
Lint is clean apart from unused-constant notes about the package.
