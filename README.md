# Insertion/deletion protection for a bit-patterned media read channel

In bit-patterned media recording every bit is written onto its own magnetic
island. If the write clock drifts against the island grid, a bit can be
written twice (an *insertion*) or skipped (a *deletion*). Everything after the
slip is shifted by one position, so a plain detector and an ordinary
error-correcting code see a long burst of errors from that point onward.

This design protects against such slips with two codes that work together:

* **A Varshamov-Tenengolts (VT) code** of length 255 carrying 247 data bits.
  A VT code can repair one inserted or one deleted bit per codeword, but only
  if the decoder knows how many bits belong to the codeword.
* **A 5-bit marker** after every codeword. The read side checks where the
  marker really is, which tells it whether the codeword before it lost a bit,
  gained one, or neither. It also re-aligns the frame grid for the rest of
  the sector.

The marker is found inside the Viterbi detector of the PR2 read channel
(target `1 + 2D + D^2`). Bits that match the marker pattern are the first
source of evidence. If noise corrupted a marker bit, the detector falls back
on the trellis: it looks at which survivor path added the least metric over
the marker window, and at which state that path ends.

The RTL has a write path (encoder and marker inserter) and a read path
(detector, slip decision, frame cutting and VT decoder). The magnetic channel
between the two is not part of the design. The testbenches model it.

## Recorded format

```
 frame = 260 bits
 +-----------------------------------------+-----------+
 | VT codeword c_1 ... c_255               | + - - - + |   marker 1 0 0 0 1
 +-----------------------------------------+-----------+
   positions 1,2,4,...,128: parity
   all other positions: the 247 data bits, in order
```

* Bit value `1` stands for the channel symbol +1, and `0` for -1.
* A codeword satisfies `sum(i * c_i) = 0 (mod 256)`, with `i` counted from 1.
  The encoder puts the data into the positions that are not powers of two.
  It computes the deficiency `d = (0 - s) mod 256` of their checksum and
  writes `d` in binary onto positions 1, 2, 4, ..., 128.
* The overall rate is 247/260 = 0.95.
* A sector is `FRAMES` frames, 16 by default, so 4160 recorded bits.

## How a slip is found

Let `p` be the position where the next marker should start on the current
frame grid. The detected bits `p-1 ... p+5` and the state `q` from the
Viterbi detector lead to one decision per marker:

| test, in this order                         | decision    |
|---------------------------------------------|-------------|
| bits `p .. p+4` equal the marker            | no slip     |
| bits `p+1 .. p+5` equal the marker          | insertion   |
| bits `p-1 .. p+3` equal the marker          | deletion    |
| none of the above, and `q = 2`              | no slip     |
| none of the above, and `q = 1`              | insertion   |
| none of the above, and `q = 3` or `q = 4`   | deletion    |

With the marker `+1 -1 -1 -1 +1`, at most one of the three pattern tests can
pass.

**Where q comes from.** The trellis state after bit `b_t` is
`{b_(t-1), b_t}`, numbered `q = 1 + b_t + 2*b_(t-1)`. The marker window runs
from the first to the last expected marker sample. Each state carries the
path metric that its survivor had when the window opened. This value is
copied along with the survivor at every add-compare-select step.

After the last marker sample the detector forms, for every state `j`:

```
dpsi[j] = metric(j) - metric of j's survivor at the window start
```

This is the metric each survivor gained inside the window. `q` is the state
with the smallest `dpsi`.

The marker's last bits decide which state the true path ends in:

* No slip: the window ends on the marker bits `m4 m5 = -1 +1`, so `q = 2`.
* Insertion: the marker arrives one sample late, so the window ends on
  `m3 m4 = -1 -1`, and `q = 1`.
* Deletion: the marker arrives one sample early. The window ends on `m5` and
  then one unknown data bit, so `q` is 3 or 4.

This is why the marker must be `+1 -1 -1 -1 +1`: the three cases then end in
four different states.

**Frame grid.** Every decision moves the grid for the rest of the sector. The
next frame starts right after the marker that was actually found. Two copies
of the grid are kept:

* `marker_window_gen` keeps one on the detector's input side, so that the
  next marker window is opened in the right place.
* `frame_aligner` keeps one on the detector's output side, to cut out the
  codewords.

A decision is made when bit `p+5` leaves the detector, about `TB` samples
after its marker entered. The next marker is still about 255 samples away, so
the input-side grid is always corrected in time.

**Cutting the codeword.** After a deletion the codeword is the 254 bits
before the found marker. With no slip it is 255 bits, and after an insertion
256 bits. The write side of `frame_aligner` reads the detected stream 8 bits
behind its decision side. This way the length is known before the codeword's
end is reached. The marker bits are dropped.

## VT correction

`vt_decoder` sums the weight `w` (number of ones) and the checksum
`s = sum(i * r_i) mod 256` while the bits arrive. The number of bits tells it
what to repair.

* **254 bits (a deletion).** Let `D = (0 - s) mod 256`.
  * If `D <= w`: a 0 is put back with exactly `D` ones to its right.
  * Otherwise: a 1 is put back with exactly `D - w - 1` zeros to its left.
* **256 bits (an insertion).** Let `D = s mod 256`.
  * If `D = w`: the first bit is removed.
  * If `D < w`: a 0 with `D` ones to its right is removed.
  * If `D > w`: a 1 with `D - w` zeros to its left is removed.
  * If no such bit exists: the last bit is removed. This happens only for the
    word `00...01`.
* **255 bits.** The word passes unchanged. If its checksum is not 0, it is
  flagged with `chk_err_o`, because the code can detect that error but not
  locate it.

Each rule fixes a position only up to the run of equal bits it falls in.
Inserting or removing a bit anywhere in that run gives the same word.

The position is found by a serial scan, one bit per cycle. The corrected
word is then formed in a single cycle by a row of multiplexers, and the 247
data bits are taken out.

Two 256-bit buffers alternate. The next codeword is written into one buffer
while the previous one is scanned in the other. A scan takes at most 257
cycles, which is less than the 260-sample frame.

## Modules

| module              | role |
|---------------------|------|
| `bpmr_pkg`          | code sizes, the marker, the `insdel_e` decision type |
| `vt_encoder`        | 247 -> 255 systematic VT encoder, one register stage, valid/ready |
| `marker_encoder`    | serialises codeword + marker, 260 bits per frame, no gaps between frames |
| `viterbi_pr2`       | 4-state PR2 Viterbi detector, register-exchange survivors, window metric tracking, `q` |
| `marker_window_gen` | marks the expected marker samples on the detector input, follows the decisions |
| `insdel_detector`   | the decision table above (combinational) |
| `frame_aligner`     | takes the decision at each marker and cuts codewords of 254/255/256 bits |
| `vt_decoder`        | single insertion/deletion correction, parity stripping, double buffer |
| `bpmr_insdel_top`   | both paths; the channel lies between `tx_bit_o` and `rx_y_i` |

### Top-level interface and timing

* **Write path.** `tx_data_i` with `tx_valid_i`/`tx_ready_o` takes one
  247-bit word. `tx_bit_o`/`tx_bit_valid_o`/`tx_bit_ready_i` gives the
  recorded bits, one per cycle, and `tx_frame_start_o` marks each frame's
  first bit.
* **Read path.**
  * Pulse `rx_start_i` before the first sample of a sector.
  * Then feed the signed 8-bit samples on `rx_y_i` with `rx_y_valid_i`, at
    most one per cycle. One PR2 unit is 16 LSB, so the noiseless levels are
    0, ±32 and ±64.
  * After the sector, send at least `TB + 16` more samples (a guard field).
    These push the last bits out of the detector.
  * Decoded words appear in order on `rx_data_o` with `rx_data_valid_o`. They
    come within two frames plus `TB + 40` samples of their codeword's first
    sample.
  * `rx_dec_*` reports every marker decision and whether it came from `q`.
  * `rx_corr_o` reports what the VT decoder repaired.
  * `rx_done_o` rises when all `FRAMES` codewords are out.

Parameters of the top: `FRAMES` (16), `Y_W` (8-bit samples), `Y_UNIT`
(16), `TB` (32-step survivors), `PM_W` (24-bit path metrics).

The path metrics are never renormalised. They wrap modulo `2^PM_W` and are
compared through the sign of their difference. This is exact while the spread
between survivors stays below `2^(PM_W-1)`. For 8-bit samples the spread
needs about 19 bits, so 24 bits leaves margin.

## Where this departs from the method it implements, and why

* **Marker pattern.** The method gives a 5-bit marker: the frame rate 255/260
  and the window length `l = 5` both say so. The pattern used here is
  `+1 -1 -1 -1 +1`, because it is the pattern for which the state rule
  `q = 2` / `q = 1` / `q in {3,4}` works with the numbering above.
* **Sector size.** The method's sectors are 4128 bits at the slip channel,
  which is not a whole number of 260-bit frames. Here a sector is 16 whole
  frames, 4160 bits.
* **Choices the method leaves open**, made here for this design:
  * VT residue `a = 0` and the systematic parity layout.
  * The sample format and survivor length.
  * Clearing the metrics at each sector start (no known starting state).
  * The guard field after each sector.
* **Slip location.** It is passed to the VT decoder as "which codeword, and
  whether a bit was gained or lost", i.e. as the codeword length. Each marker
  re-synchronises the grid, so one slip per codeword can be handled. Two
  slips between the same pair of markers cannot.
* **Complexity.** The operator counts of this hardware are not matched to
  the method's own count. It has 8 squarers (branch metrics), 8 adders, 4
  comparators and a 4-way minimum search per sample in the detector. Area
  numbers after synthesis are roughly: detector 425 flip-flops, VT decoder
  890, whole design about 1800.
* **Not included.** The earlier marker-only scheme, which the method compares
  against: a 3-bit marker with table-based correction.
* **Slips inside a marker.** These go through the same rules. If the last
  marker bit is lost, the slip may only be seen at the next marker. The bit
  lost there is then the first bit of the next codeword, and the VT code
  repairs it just as well. The random runs below include such cases. They are
  not forced on purpose.

## Verification

Each module has a self-checking testbench in `tb/` that ends with a line
`TB_RESULT checks=N failures=M`. Reference functions shared by the
testbenches are in `tb/bpmr_tb_pkg.sv`.

| testbench                 | what it checks |
|---------------------------|----------------|
| `vt_encoder_tb`           | checksum 0, data placement, agreement with a reference encoder, latency, stall |
| `marker_encoder_tb`       | exact bit stream of 4 frames, no gaps, frame starts, output stalls |
| `viterbi_pr2_tb`          | bit decisions against sent bits, first-decision latency, `q` equals the true end state at every window, agreement of a 19-bit (wrapping) and a 24-bit metric version under heavy noise |
| `insdel_detector_tb`      | all 128 windows x 4 values of `q` against a symbol-level reference |
| `marker_window_gen_tb`    | window placement after none/insertion/deletion decisions, gaps in the stream |
| `frame_aligner_tb`        | 16-frame sector with a slip in most frames and flipped marker bits; every codeword bit, length, type and decision source |
| `vt_decoder_tb`           | 400 words clean, with a deletion, or with an insertion; every correction rule reached; error flags |
| `bpmr_insdel_top_tb`      | end to end at the default size, 10 sectors: see below |
| `bpmr_ber_tb`             | bit error rate at Eb/N0 = 10, 12, 14, 16 dB (see below) |

The end-to-end test works as follows:

* Each sector's data goes through the write path.
* A channel model then inserts or deletes one bit, optionally flips a marker
  bit, applies `1 + 2D + D^2`, adds Gaussian noise and quantises to 8 bits.
* The samples are fed back through the read path, and every word must come
  back intact and on time.
* The test counts every mechanism and fails if one never happens. The
  mechanisms are: decisions of each kind, decisions by match and by `q`,
  corrections of each kind, and marker windows off the nominal grid.

`bpmr_ber_tb` runs 40 sectors at each of Eb/N0 = 10, 12, 14 and 16 dB.
Each sector has a slip with probability 0.5, at a uniform place.

* Eb/N0 is defined as `10 log10(sum h^2 / (2 R sigma^2))`, with
  `sum h^2 = 6` and `R = 247/260`.
* The test prints the data bit errors and any marker decision that differs
  from the true slip.
* It requires every word to be delivered and no bit errors at 16 dB.
* At the fixed seed it measures a BER of about 3e-4 at 10 dB, about 1e-5 at
  12 dB, and no errors at 14 and 16 dB.
* A second part runs at 14 dB and lets every recorded bit slip with a fixed
  probability. At 100 ppm of insertions, or 50 + 50 ppm of insertions and
  deletions, no errors occur. At 1000 ppm the BER is about 3e-2. A sector
  then holds about four slips, and two slips between the same two markers
  cannot be repaired: the grid is then off by two, and the rest of the sector
  is lost.

To run a testbench with Verilator (5.x), from the folder that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/bpmr_pkg.sv tb/bpmr_tb_pkg.sv tb/bpmr_insdel_top_tb.sv \
  --top-module bpmr_insdel_top_tb -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. All testbenches finish in
seconds.
