# 1024-point FFT/IFFT processor, 8 samples in and 8 out per clock, normal order

This is synthesizable SystemVerilog for a memory-based 1024-point FFT/IFFT processor. It is
built after the thesis *Design of FFT Processor with Parallel-In-Parallel-Out in Normal Order*.
The processor serves the DFT-based channel estimator of an IEEE 802.16e (OFDMA) receiver,
which runs at a 78.4 MHz system clock. It must finish a transform within a quarter of an
OFDM symbol, 25 µs or 1960 clocks.

What the processor does:

- It takes **8 complex samples per clock in normal order**: x(8c) … x(8c+7) on lanes 0…7.
- It computes the FFT, or the IFFT, in place.
- It returns **8 results per clock, also in normal order**: X(8c) … X(8c+7).
- It needs no reorder buffer on either side.
- It uses **eight single-port RAM banks** of 128 × 40 bits, **four radix-2/4/8
  single-delay-feedback processing elements (PEs)** and **two radix-2 butterfly units**.

The two ideas that make this work are the memory layout, covered in the next section, and the
conflict-free schedule that follows from it. They are the hardest part of the design and take
most of the room below.

```
 in_data[8] ──► wr_commutator ──► 8 × mem_bank ──► rd_commutator ──► out_data[8]   (load / unload)
                     ▲          128 × 40, 1 port        │
                     │                                  ▼ 4 reads per clock
                     └── pad ◄── [r2_bu × 2] ◄── PE0 PE1 PE2 PE3 ◄── tw_rom per PE
                      4 writes    stage 3 only    radix-2/4/8 SDF, twiddle, scaling
                               fft_ctrl: addresses, schedule, stalls, states
```

## 1. The algorithm

The sample index is split as n = n1 + 2·n2 + 16·n3 + 128·n4, with n1 ∈ {0,1} and n2, n3,
n4 ∈ 0…7. The transform then becomes three radix-8 stages and one radix-2 stage:

| stage | transforms over | twiddle applied after the 8-point DFT | result index |
|---|---|---|---|
| 1 | n4 | W1024^(k4·(n1 + 2n2 + 16n3)) | n1 + 2n2 + 16n3 + 128k4 |
| 2 | n3 | W1024^(8k3·(n1 + 2n2)) | n1 + 2n2 + 16k3 + 128k4 |
| 3 | n2 | W1024^(64k2·n1) | n1 + 2k2 + 16k3 + 128k4 |
| 4 | n1 (radix 2) | none | X(512k1 + 64k2 + 8k3 + k4) |

Stages 1–3 each make one pass through the memory. Each PE reads its 8 butterfly inputs on 8
consecutive clocks and writes the 8 twiddled results back to the same addresses. Stage 4 has
no pass of its own. During stage 3 the four PEs run in two pairs: PE0/PE1 and PE2/PE3 work on
the partners n1 = 0 and n1 = 1 of the same radix-2 butterfly. A radix-2 unit (`r2_bu`) at the
outputs of each pair combines them before they are written, so three memory passes compute
the whole 1024-point transform.

The IFFT uses the identity IFFT(X) = conj(FFT(conj(X)))/N. The PEs conjugate their input
during stage 1, and the radix-2 units conjugate their output. The 1/N scaling is done by the
fixed-point formats; see section 5.

## 2. Memory layout: why both sides can stream in normal order

A 10-bit data address A is stored in

```
bank = (A[2:0] + A[9:7]) mod 8          row = A[9:3]
```

This rule is in `fft_pkg::bank_of`/`row_of`. The bank is skewed by the top three address bits.
The layout has to satisfy both ends of the transform:

- **Input.** x(8c+i) is stored at A = 8c+i. Eight consecutive inputs differ only in A[2:0] = i,
  so they fall into eight different banks. The load writes one full row per clock.
- **Output.** An in-place radix-8 FFT leaves X(k) at the digit-reversed address
  A = {k2k1k0, k5k4k3, k8k7k6, k9}. Eight consecutive results X(8c…8c+7) differ only in
  k2k1k0, which lands in A[9:7]. Without the skew they would all sit in one bank. With the
  skew they again spread over eight banks, so the unload reads one full output row per clock,
  in normal order.

Plain low-bit interleaving gives only the first property. Top-bit interleaving gives only the
second. Adding the two digits gives both, which is what lets the design drop the output
reorder buffer.

### Addresses of the processing elements

Each PE p (p1p0 = 0…3) steps an 8-bit butterfly counter b7…b0 through 256 counts per stage.
Its low three bits b2b1b0 are the sample position inside the PE's 8-point butterfly. The PE
reads and writes:

| stage | data address A (bits 9…0) | bank = A[2:0] + A[9:7] | twiddle ROM address |
|---|---|---|---|
| 1 | b2b1b0 · b7b6b5b4b3 · p1p0 | b2b1b0 + b3p1p0 | 0 · b7…b0 |
| 2 | b7b6b5 · b2b1b0 · b4b3 · p1p0 | b7b6b5 + b3p1p0 | 1000 · b4…b0 |
| 3 | b7b6b5b4b3 · p1 · b2b1b0 · p0 | b7b6b5 + b1b0p0 | 100100 · b2b1b0 |

The address of each stage places the butterfly position b2b1b0 on the digit being transformed:
n4, then n3, then n2. The twiddle ROM holds the twiddles of one PE only; see section 4.

## 3. The conflict-free schedule

Each bank has a single port, so in every clock the four reads and four writes must go to
eight *different* banks. A result is written back a fixed **D clocks** after its sample was
read. D is 24 in stages 1 and 2 and 22 in stage 3. The memory read, the PE and, in stage 3,
the radix-2 unit take 18 or 19 clocks; padding registers in the top level make up the rest.
In the same cycle, the write therefore belongs to count b−D while the read belongs to count b.

- **Stage 1.** Reads use banks b2b1b0 + {b3, p}, that is, one "half" of the banks selected by
  b3. D = 24 = 3·8 keeps b2b1b0 and flips b3, so the writes use exactly the other four banks.
  The whole stage runs as one group of 256 counts with no stall.
- **Stage 2.** The bank is b7b6b5 + {b3, p}. The same argument works as long as b7b6b5 is the
  same for the read and the write, which holds within a group of 32 counts. A new group
  changes the bank offset. The controller therefore stops reading at each group boundary and
  waits until the last write of the group is done (**inner-stage stall**, `inner_stage_inc`)
  before it starts the next group.
- **Stage 3.** The bank is b7b6b5 + {b1, b0, p0}. PE0 and PE2 (and PE1 and PE3) would hit the
  same bank, so **PE2 and PE3 run one clock behind PE0 and PE1**. In one clock the read counts
  are then b and b−1, and the write counts are b−22 and b−23. Their low bits b1b0 are four
  different values, so the eight accesses use all eight banks. Groups and stalls work as in
  stage 2.
- **Between stages** the controller also waits for the last write (**outer-stage step**,
  `outer_stage_inc`). The next stage then reads only data that have been written.

A group of G counts takes G + round_up_to_8(D_eff) clocks. Reads start only when the sample
tag is 0, so the PE pipelines drain by themselves during a stall. This gives the clock counts:

| stage | groups × (G + padding) | clocks |
|---|---|---|
| 1 | 1 × (256 + 24) | 280 |
| 2 | 8 × (32 + 24) | 448 |
| 3 | 8 × (32 + 24), D_eff = 22 + 1 | 448 |
| total | | **1176** |

Within each group, the controller passes through five states: `S_RD` (reads only, until the
first sample reaches the twiddle multiplier), `S_TW` (until the first write), `S_WR` (reads and
writes), `S_WAIT_TW` (reads done, samples still ahead of the multiplier) and `S_WAIT_WR`
(waiting for the last write). Around these it has `S_IDLE` (loading allowed) and `S_UNLOAD`
(128 output rows).

## 4. Inside a processing element (`pe`)

A PE turns 8 serial samples into 8 serial, twiddled and scaled results in normal order:

```
conj? ─► SDF(4) ─► ×(−j) on positions 6,7 ─► SDF(2) ─► ×1, W8, −j, W8³ on odd positions
      ─► SDF(1) ─► reorder buffer ─► complex multiplier (twiddle ROM) ─► fixed-point block
```

- **`sdf_stage`.** A radix-2 single-delay-feedback stage with an M-word feedback register,
  where M is 4, 2 or 1. The tag bit of weight M splits the stream into blocks of 2M samples.
  - During the first half of a block, samples are pushed into the feedback register, and the
    differences stored from the previous block leave the stage.
  - During the second half, the stored sample a and the incoming sample x give a + x, which
    leaves the stage, and a − x, which is stored.
  - The output tag is the input tag − M. A valid flag travels with every word, so bubbles
    need no special handling.
  - Each stage adds one guard bit.
- **Trivial and constant multipliers.** `mul_neg_j` swaps the real and imaginary parts and
  negates one. `mul_w8` multiplies by (1 − j)/√2, and by one more −j for W8³. It uses the
  8-fraction-bit constant 181/256 = 0.10110101b, built as shifts by 1, 3, 4, 6 and 8. All
  shifted copies of A and B are summed in one adder tree before a single truncation. This is
  the delay-optimised form: there is no adder in front of the tree.
- **`reorder_buf`.** The SDF delivers X(0) X(4) X(2) X(6) X(1) X(5) X(3) X(7). To send X(k)
  out at position k + 3, X(1) and X(3) pass straight through, X(0), X(2), X(5) and X(7) wait
  3 clocks, and X(4) and X(6) wait 6. At most three words wait at once, so three registers
  suffice. Each register is rewritten in the clock it is read, with three slots:
  - slot 0 holds X(0), then X(6);
  - slot 1 holds X(4), then X(7);
  - slot 2 holds X(2), then X(5).

  Slot s of a group uses physical register (s + r) mod 3, where r advances by 2 from one group
  to the next. This gives three allocation modes that repeat every 24 clocks.
- **`tw_rom`.** Each PE has its own 296-word ROM:
  - 256 words for stage 1, W^(k(4n1+p));
  - 32 words for stage 2, W^(8k(4n2+p));
  - 8 words for stage 3, W^(64k(p mod 2)).

  The words are 18-bit Q2.16 values, so 1.0 is exact. They are computed at elaboration with
  `$cos`/`$sin`, and synthesis turns the table into logic. The ROM address for result k is
  given with input sample k and delayed inside the PE to meet that result.
- **`cmplx_mult`.** Three real multipliers compute
  (A + jB)(C + jD) = A(C+D) − D(A+B) + j[A(C+D) + C(B−A)], over 2 pipeline clocks.
- **`fixed_point`.** An arithmetic shift right (truncation) by the stage's shift, then
  saturation to 20 bits; 1 clock.

The PE must be clocked every cycle with a tag that keeps counting. Result k of a butterfly
whose sample 0 entered at clock t leaves at **t + 17 + k**. The 17 clocks are the SDF stages
(5 + 3 + 2), the reorder buffer (4), the multiplier (2) and the fixed-point block (1).

`r2_bu` forms a + b and a − b from a PE pair, shifts by the stage-4 shift, conjugates in IFFT
mode and saturates; 1 clock. `rd_commutator` registers each slot's bank number, so read data
return to the right slot one clock after the request. `wr_commutator` is purely
combinational. Both contain assertions that no bank is requested twice in a cycle.

## 5. Number formats

All data words are 20 bits per component (40 bits per complex word). The number of integer
bits, sign included, after each stage follows a worst-case growth analysis:

| | input | stage 1 | stage 2 | stage 3 | stage 4 (output) |
|---|---|---|---|---|---|
| IFFT | 3 (Q3.17) | 6 | 9 | 12 | 13 (Q13.7) |
| FFT | 3 (Q3.17) | 3 | 6 | 6 | 6 (Q6.14) |
| right shift, IFFT | | 3 | 3 | 3 | 1 |
| right shift, FFT | | 0 | 3 | 0 | 0 |

- **IFFT mode.** Sized for 1024 non-zero inputs in ±2. An IFFT output word read as Q3.17 is
  1/1024 of the unscaled sum: the usual 1/N.
- **FFT mode.** Sized for the channel-estimation case, where only 8 samples among the first
  128 are non-zero. Only the n4 = 0 input of each stage-1 butterfly can then be non-zero, so
  stage 1 does not grow. A dense full-scale FFT input overflows stage 1, where it saturates
  instead of wrapping.

## 6. Interface and timing (`fft_pipo_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| in_valid, in_data[8] | in | 1, 8 × (2 × 20) | input row c, x(8c+i) on lane i, Q3.17 |
| in_ready | out | 1 | idle: rows are accepted; rows count 0…127 in order |
| mode_ifft | in | 1 | 1 = IFFT; sampled with fft_start |
| fft_start | in | 1 | start the transform of the loaded samples |
| busy | out | 1 | transforming or unloading |
| out_valid, out_data[8] | out | 1, 8 × (2 × 20) | output row c, X(8c+i) on lane i |
| done | out | 1 | pulse with the last output row |
| state, stage, inner_stage_inc, outer_stage_inc | out | | progress of the controller |

The sequence is:

1. Load 128 rows while `in_ready` is high. Gaps in `in_valid` are allowed.
2. Pulse `fft_start`.
3. The first output row appears **1178 clocks** after the clock that samples `fft_start`
   (one clock to enter the first stage, 1176 compute clocks, and one clock of bank read).
4. All 128 rows follow on consecutive clocks, and `done` marks the last one.

Load, transform and unload share the banks and therefore run one after the other. One
transform, including load and unload, takes 1432 clocks: 18.3 µs at 78.4 MHz.

## 7. Choices made here where the thesis gives only an outline

- **Latency.** The thesis reports 1169 (and, elsewhere, 1160) clocks. This design takes 1176
  compute clocks and 1178 to the first output, because every group is rounded to whole
  8-clock butterflies. The requirement of 1960 clocks is met.
- **Memory.** The banks are plain arrays with a one-clock synchronous read. The thesis uses
  compiled SRAM macros.
- **Multiplier placement.** The −j and W8 multipliers sit between the SDF stages in the
  radix-2³ arrangement that fits feedback lengths 4-2-1 and a 3-register reorder buffer. The
  reorder-buffer register allocation is this design's own.
- **Twiddle words.** 18 bits in Q2.16, rounded to nearest.
- **Saturation.** Added in the fixed-point block and the radix-2 units. With the inputs the
  formats are sized for, it never acts.
- **Host interface.** The row numbering on load, the `fft_start`/`done` handshake and the
  unload without back-pressure are this design's own.
- **State boundaries.** The five pipeline states are derived from pipeline occupancy.

## 8. Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. To run one with Verilator, name the
package first and let `-y rtl` find the modules:

```
verilator --binary --timing --assert -y rtl rtl/fft_pkg.sv tb/tb_fft_pipo_top.sv \
          --top-module tb_fft_pipo_top -o sim && obj_dir/sim
```

The end-to-end test `tb_fft_pipo_top` runs at the full default size. It compares every output
with a double-precision DFT. It checks the SQNR of each run and the error of every single
output bin, the normal output order and the latency. It also counts the inner and outer
stalls, the FFT/IFFT mode switches and the clocks in which PE2/PE3 run late. Measured
signal-to-quantisation-noise ratios, with the thesis's requirement for the two cases it
specifies:

| run | SQNR | requirement |
|---|---|---|
| FFT, 8 random non-zero inputs among the first 128 | 81.9 dB | 81.5 dB |
| FFT, second sparse input | 85.3 dB | 81.5 dB |
| FFT, impulse | 82.4 dB | |
| IFFT, 1024 random inputs in ±2 | 74.7 dB | 60.1 dB |
| FFT, 1024 random inputs in ±0.25 | 78.3 dB | |

The testbench's own pass thresholds sit lower for the FFT runs, so that other random inputs
do not fail on the margin: 70 to 75 dB for the impulse and sparse runs, 50 dB for the dense
low-amplitude run. The IFFT threshold is the thesis's
60.1 dB.

`tb_fft_ctrl` runs the controller on its own. It checks that:

- in every clock all reads and writes hit different banks;
- in each stage every address is read once and written once, D clocks later, by the same PE;
- no address is read before the previous stage wrote it;
- the unload follows the digit-reversed output addresses;
- each transform has 14 inner-stage and 3 outer-stage steps.

The unit testbenches compare each datapath block with a reference model on random data.

## 9. Not covered

- **Other transform sizes.** The processor does only 1024 points: the index split and the
  bank size are fixed. The 2048-point FFT of the 20 MHz 802.16e profile does not fit.
- **Other blocks from the thesis.** The rest of the receiver is not built: the 5-bank FFT
  used for demodulation, the partial-FFT processor the thesis proposes as future work, and
  the other receiver blocks.
- **Timing closure.** Clock frequency, area and power in a real process are not evaluated.
