# CD data processor for a high-speed CD-ROM drive

This is the digital data path of a CD signal processor, in synthesizable
SystemVerilog. It takes the bit stream that the slicer and PLL recover from
the disc and turns it into 24 corrected bytes per frame with error flags,
plus a subcode stream, for a CD-ROM decoder chip. The design is built for
48X constant-angular-velocity playback, where the channel bit rate is about
207 Mbit/s. It works on one clock, the channel bit clock, so every frame gets
the same budget of 588 clocks at any disc speed.

Four parts do the work:

1. **EFM front end.** NRZI decoding, frame sync with protection and
   insertion, 14-to-8 demodulation, and subcode sync detection.
2. **CIRC error correction.** Deinterleaving is done inside one 2 KB
   single-port SRAM. A pipelined Reed-Solomon decoder corrects C1 errors and
   C2 errors and erasures. It solves the key equation with the modified
   Euclid algorithm and corrects the stored bytes in place.
3. **Audio processor.** It undoes the scrambling delay and, in CD-DA mode,
   interpolates samples that could not be corrected.
4. **Subcode buffer.** It moves the subcode stream from disc timing to
   crystal timing, so that it stays in step with the main data after a track
   jump.

A register interface for the drive microcontroller, a March C- self test
for the SRAM and the digital delta-sigma modulator of a 1-bit audio DAC
complete the chip's digital part.

```
 bit_en/bit_in ─► sync_detector ─► efm_demod ─► efm_writer ──► (SRAM input ring)
                     │ WFCK                          │ subcode byte
                     ▼                               ▼
                                              subcode_proc ─► subcode_buffer ─► sub_word
                                                                  ▲ RFCK
   SRAM 2 KB ◄─► mem_arbiter ◄─┬─ efm_writer (WFCK)
                               ├─ ecc_ctrl ◄─► rs_decoder   (RFCK)
                               └─ audio_proc ─► main_byte / main_flag
   sram_bist (takes the SRAM port in test mode)
   micom_if (mode, status, counters, BIST)     sdm_dac (1X PCM ─► dac_out)
```

## Two frame clocks on one clock source

The disc delivers frames at the pace of the PLL: this is **WFCK**, the
`frame_start` pulse of the sync detector. Everything after the SRAM runs at
**RFCK**, generated in `cd_dp_top`. RFCK is a counter of `FRAME_CYCLES` = 588
clocks, started when three frames have been written.

Both clocks are single-cycle enables in the one `clk` domain, and both have
the period of one frame. WFCK jumps in phase when the pickup jumps tracks or
the PLL slips. RFCK does not.

Two buffers absorb the difference:
- an 8-frame input ring at the bottom of the SRAM, for the main data;
- a 16-entry subcode buffer, for the subcode.

The bench demonstrates this with a 250-bit pause in the channel stream.

## EFM front end

**`sync_detector`**
- Turns the NRZI level into channel bits: a change of level is a 1.
- Looks for the 24-bit frame sync `100000000001000000000010`.
- Out of lock, the first sync found locks it.
- In lock, a sync is accepted only within ±`WIN` bits (2) of the expected
  position. A sync pattern elsewhere in the frame is ignored (protection).
- If no sync arrives, one is inserted at the window's end (insertion). After
  `MAX_MISS` (8) inserted frames in a row, lock is dropped.
- It cuts each 588-bit frame into 33 symbols of 14 bits. Symbol s is complete
  at bit 40 + 17s of the frame.

**`efm_demod`**
- Maps each 14-bit word to a byte by table lookup, registered with one clock
  of latency.
- Flags words that are not in the table (`code_err`).
- Recognises the subcode syncs S0 = `00100000000001` and
  S1 = `00000000010010`.

> **The EFM table is a stand-in.** The 14-bit code set is the real one: words
> with 2 to 10 zeros between ones, and at most 10 zeros at either end. But the
> table gives byte *b* the *b*-th such word in ascending order, skipping S0
> and S1. It does not reproduce the standard byte assignment, which is a
> fixed list and cannot be derived from a rule. The table is a `localparam`
> computed by a function in `efm_demod.sv`. Replace it with the standard
> table to read real discs. The test benches build their modulator with the
> same rule, so everything else is tested as it would run on a real disc.

**`efm_writer`**
- Sends symbol 0 (the subcode byte) to the subcode processor.
- Writes symbols 1..32 into the input ring at address `{slot, column}`.
  There are 8 slots, and the slot advances at each WFCK.

## CIRC decoding in a 2 KB SRAM

### Memory map

| Address | Content |
|---|---|
| `0x000–0x0FF` | input ring: 8 frames × 32 bytes, written at WFCK |
| `0x100–0x7FF` | deinterleave area: 1792 bytes, 28 column windows |

Column *j* (C2 symbol *j*) must hold 4·(27−*j*) frames of delay. Its window
is 4·(27−*j*)+6 bytes, and the windows sum to 1680 bytes. The C1 frame
counter *k* runs modulo 1792, and the byte of frame *s* in column *j* lives at

```
addr = 0x100 + ((s + col_base(j)) mod 1792)
col_base(j) = sum over i <= j of window(i), minus 1
```

Every column is then a ring of its own. A write at slot *k* and a read at
slot *k*−4(27−*j*) never collide, because each window has 6 slack bytes.
All the address arithmetic is in `cd_pkg` (`col_base`, `col_addr`,
`slot_sub`).

### Frame schedule (`ecc_ctrl`)

On each RFCK tick:

1. **C1 of frame k.** Read the odd symbols from the newest ring slot and the
   even symbols from the slot before. This undoes the one-frame delay the
   encoder applies to half the symbols. Invert the parity symbols 12–15 and
   28–31, and stream the 32 bytes into the decoder. Symbols 0–27 are also
   copied into their deinterleave columns at slot *k*.
2. **C2 of frame m = k−1.** Read column *j* at slot *m*−4(27−*j*). Each
   symbol carries, as its erasure flag, the C1 flag of the C1 frame it came
   from. C2 runs one frame behind C1, so that the zero-delay column has
   already been corrected by C1.
3. **Correction.** A second state machine takes each decoder result.
   - For C1 it records the flag per frame (`c1flag[128]`).
   - For C2 it records the failure per frame (`c2fail[8]`).
   - It then corrects each reported symbol in the SRAM by
     read / XOR / write. Parity symbols are not rewritten, since nothing
     reads them again.

Cost per frame:
- about 88 SRAM cycles for the reads and copies;
- 3 per corrected symbol;
- 24 for the audio processor;
- 32 for the EFM writer.

That is well under 588. `ecc_overrun` reports a tick that arrives before the
previous frame was issued; it never happens in the benches.

**Flags.**
- A C1 codeword is flagged when it fails.
- It is also flagged when it needed two corrections (`C1_FLAG_ON_2`, on by
  default). A heavily damaged 32-byte word lies within two symbols of some
  codeword about 0.75 % of the time. Without this flag, such a
  miscorrection could reach the output unflagged. Two errors that were
  really corrected cost C2 nothing: C2 treats them as erasures, and their
  error value comes out as 0.
- A C2 codeword decodes up to 4 erasures.
- When C2 fails, each output byte takes the C1 flag of its symbol.

### The Reed-Solomon decoder (`rs_decoder`)

Both codes are over GF(2⁸) with polynomial x⁸+x⁴+x³+x²+1 and 4 parity
symbols, with roots α⁰..α³. C1 is the (32,28) code, decoded for up to 2
errors. C2 is the (28,24) code, decoded for up to 4 erasures, or any mix
with 2·errors + erasures ≤ 4.

The decoder is a four-stage pipeline with valid/ready handshakes between the
stages, so up to four codewords are in flight:

| Stage | Work | Cycles |
|---|---|---|
| S1 | Syndromes S₀..S₃ (Horner, highest-degree symbol first). Each erased position's locator α^pos is recorded. | N |
| S2 | Erasure locator Λ(x) = ∏(1 + Xⱼx) and modified syndrome T(x) = S(x)Λ(x) mod x⁴ | 1 |
| S3 | Modified Euclid | ≤ 15 |
| S4 | Chien search and Forney values | N |

**S3, modified Euclid.** It starts from the pair (x⁴, T(x)), with the
multiplier polynomial set to Λ(x). Each cycle does one partial-division step:
cancel the leading term of the higher-degree remainder, or swap the two. It
stops when 2·deg(remainder) < 4 + e, with e the number of erasures. The
multiplier is then the errata locator σ(x), and the remainder is the errata
evaluator ω(x). Solving with Λ included is what lets one solver handle errors
and erasures together.

**S4, Chien search.** It steps x through α⁻ᵖ for p = 0..N−1: each step
multiplies by α⁻¹ = 0x8E. At each root it computes Y = ω(x) / (x·σ′(x)). σ′
has only odd terms, and the inverse is α²⁵⁴, built as a multiplier chain.

A codeword is marked **failed** when any of these holds:
- more than 4 erasures;
- Euclid does not stop within 15 steps;
- σ(0) = 0, deg ω ≥ deg σ, or 2·deg σ > 4 + e;
- the number of Chien roots differs from deg σ.

Without the σ/ω consistency tests, about 1 in 2000 random words would be
"corrected" into something that is not a codeword.

One codeword leaves every N+1 cycles (33 for C1, 29 for C2). Latency is
about 2N+12 cycles. `res` is a packed struct (`rs_result_t`) carrying up to 4
positions and values, the error and erasure counts, the fail bit and an
11-bit tag that identifies the frame.

## Audio processor and interpolation

On each RFCK tick *k*, `audio_proc` reads audio frame *k*−5 from the
deinterleave area.

**Word placement.** The encoder delays half the words by two frames. Word
*w* (0..11, left/right alternating, 16 bits, low byte first) sits at
positions 16·w[1] + 2·{w[3:2], w[0]} of a C2 codeword. Words with w[1] = 0
come from C2 frame *k*−5; the others come from C2 frame *k*−3.

**Flag.** A byte is flagged when its C2 codeword failed and the C1 flag of
that symbol is set.

**Interpolation.** In CD-ROM mode (the reset state) the bytes go out
unchanged, with their flags. In CD-DA mode (MICOM register 0, bit 0), a
flagged sample is replaced:
- by the mean of the previous output sample and the next sample of the same
  channel;
- by the previous output sample (hold) if the next one is flagged too.

To see the next sample, each channel is delayed by one sample. So the very
first frame after start carries 20 bytes, and every frame after it carries 24.

**Output.** `main_valid`, `main_byte` and `main_flag`, with `main_frame` on
the first byte of a frame. 98 frames × 24 bytes = 2352 bytes, one CD-ROM
sector.

## Subcode path

**`subcode_proc`**
- Locks on an S0 frame followed by an S1 frame.
- Expects the next pair 98 frames later. Stray S0/S1 patterns elsewhere are
  ignored.
- A missing pair is inserted at its expected place. After `MAX_MISS` (4)
  missing pairs, lock is dropped.
- Decisions are made one frame late, because S0 is only confirmed by the S1
  that follows it.
- The output word is `{S0-frame, S1-frame, byte}`, 10 bits.

**`subcode_buffer`**
- 16 × 10 bits. The write pointer moves at WFCK and the read pointer at RFCK.
- Reading starts once 8 words are stored (half full), so it rides out ±7
  frames of WFCK/RFCK slip.
- `sub_ok` qualifies each word read. Underflow and overflow are reported.
- Subcode words leave on the same RFCK as the main data. The offset between
  a sector's subcode sync and its main data is therefore fixed, even after a
  track jump. The CD-ROM decoder uses this offset to start buffering a
  sector of CD-DA audio.

## Microcontroller registers (`micom_if`)

Synchronous write, combinational read, 3-bit address:

| Addr | Name | Content |
|---|---|---|
| 0 | MODE | bit 0: CD-DA (interpolation on) |
| 1 | STATUS | frame sync locked, subcode locked, ECC primed, subcode buffer running |
| 2 | C1ERR | C1 failures |
| 3 | C2ERR | C2 failures |
| 4 | C1COR | C1 corrected codewords |
| 5 | C2COR | C2 corrected codewords |
| 6 | SUBQ | last subcode byte delivered |
| 7 | BIST | write bit 0 to start the memory test; read bit 0 busy, bit 1 done, bit 2 fail |

The counters in registers 2–5 saturate at 255. Writing any value clears
them.

## Memory self test (`sram_bist`)

Writing 1 to register 7 starts a March C- test of the SRAM. While it runs,
`sram_bist` owns the SRAM port through a mux in the top. It is a test mode:
the data path must be restarted afterwards, because the memory contents are
gone.

The test has six elements over all 2048 addresses:

```
⇑(w0)  ⇑(r0,w1)  ⇑(r1,w0)  ⇓(r0,w1)  ⇓(r1,w0)  ⇑(r0)
```

- Backgrounds are all-zero and all-one bytes.
- A read is compared one clock later, and the write of the same element
  follows in that clock.
- The run takes exactly 11 × 2048 = 22 528 clocks.
- It reports done and fail, the first failing address and the bits that
  differed.
- It finds stuck-at, transition, address-decoder and inversion-coupling
  faults. The bench injects one of each into its own memory model.

## 1-bit DAC modulator (`sdm_dac`)

A second-order delta-sigma modulator: two integrators, with the 1-bit output
fed back to both as ±32768. On each `os_en` it takes the latest 16-bit PCM
sample and emits one bit whose density follows the sample. The analog
low-pass filter after it is not part of this RTL.

## Files

Each file starts with a comment on what it does, its interface, its timing,
and which parts are this design's own choices.

**`rtl/`**

| File | Content |
|---|---|
| `cd_pkg.sv` | GF(2⁸) functions, code constants, address map, `rs_result_t` |
| `cd_dp_top.sv` | top level, RFCK generator |
| `sync_detector.sv`, `efm_demod.sv`, `efm_writer.sv` | EFM front end |
| `sram_2kb.sv` | 2048 × 8 synchronous single-port RAM, written as an array |
| `mem_arbiter.sv` | fixed priority: EFM writer, then ECC, then audio |
| `rs_decoder.sv`, `ecc_ctrl.sv` | CIRC decoding |
| `audio_proc.sv` | descrambling, flags, interpolation |
| `subcode_proc.sv`, `subcode_buffer.sv` | subcode path |
| `micom_if.sv` | microcontroller registers |
| `sram_bist.sv` | March C- self test of the SRAM |
| `sdm_dac.sv` | 1-bit DAC modulator |

**`tb/`**
- One self-checking bench per module, `tb_<module>.sv`.
- `tb_efm_pkg.sv`: an independent EFM modulator.
- `tb_circ_pkg.sv`: an independent CIRC encoder (its own GF tables, with the
  parity solved by Gaussian elimination).

### Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl -Itb \
  rtl/cd_pkg.sv tb/tb_efm_pkg.sv tb/tb_circ_pkg.sv rtl/*.sv tb/tb_cd_dp_top.sv \
  --top-module tb_cd_dp_top -o sim && obj_dir/sim
```

For any other bench, replace `tb_cd_dp_top` in both places. Each bench has a
watchdog and ends with a `TB_RESULT checks=<n> failures=<n>` line.

`tb_cd_dp_top` runs the top at its default parameters: 500 frames at 588
clocks per frame, about one second of simulation. It contains:
- a bench CIRC encoder and EFM modulator;
- single-byte errors on every second frame (C1 corrections);
- an invalid EFM word;
- a 12-frame burst, about 2.1 mm of track, which must come out with no flag;
- an 80-frame burst (C2 failures, then interpolation and hold);
- a destroyed frame sync and a missing subcode sync;
- a 250-bit pause in the channel stream;
- a switch from CD-ROM to CD-DA mode over the register bus;
- a DAC density test;
- the memory self test, started over the register bus at the end.

It checks every unflagged sample against the encoded audio and every flagged
sample against the interpolation rule. It also counts each mechanism and
fails if one never happened.

### Changing things

- **Disc speed.** Speed changes only the clock frequency.
  - Keep `FRAME_CYCLES` equal to the channel bits per frame (588) when the
    clock is the channel bit clock.
  - With a faster system clock, raise `FRAME_CYCLES` to clock ÷ frame rate
    and give the front end a `bit_en` strobe.
- **Real discs.** Replace `make_table()` in `efm_demod.sv` with the standard
  EFM table, and the benches' `efm_word()` with the same table.
- **Window sizes.**
  - Sync protection: `WIN` and `MAX_MISS` in `sync_detector`.
  - Subcode lock: `MAX_MISS` in `subcode_proc`.
  - Subcode buffer: `DEPTH` and `START_FILL`.
- **Flag policy.** Set `C1_FLAG_ON_2` in `ecc_ctrl` to 0 to flag only failed
  C1 codewords.

## Synthesis size

Generic cells from Yosys, excluding the RAM macro:

| Block | Cells | Flip-flop bits |
|---|---|---|
| Whole top | ≈ 5200 | ≈ 1370 |
| `rs_decoder` | ≈ 3400 | ≈ 610 |

The top also has 16 384 RAM bits and the 160-bit subcode buffer.

## How far it follows its source, and where it departs

What is taken as described:
- the block set;
- the 2 KB SRAM holding the main data between WFCK and RFCK;
- C1 decoding for 2 errors, and C2 decoding for 4 erasures using the C1 flags
  as erasures;
- flags copied from C1 when C2 fails;
- the five decoding steps, and the modified Euclid solver producing σ and ω
  together;
- a pipelined decoder;
- interpolation on in CD-DA mode and off in CD-ROM mode, driven by the ECC
  output flags;
- 24 bytes per frame and 98-frame subcode blocks;
- a 16 × 10-bit subcode buffer written at WFCK and read at RFCK.

This design's own choices, where the source is silent:
- the NRZI input and the single-clock scheme;
- the memory map and the 8-frame input ring;
- the frame schedule, with C2 one frame behind C1;
- the arbiter;
- the stream interfaces;
- every window and miss limit;
- the interpolation formula;
- the 10-bit subcode word layout;
- the register map;
- the DAC modulator structure;
- the March C- algorithm of the memory self test;
- the extra C1 flag on two corrections.

Taken from the CD standard rather than from the source:
- frame format, sync patterns, the GF polynomial and code roots;
- the CIRC delays (4-frame steps, one-frame odd/even delay, inverted parity).

Which symbol half carries the one-frame delay, and where each audio word sits
in a C2 codeword, are a consistent reading of that structure. They are not
verified against recorded discs.

Known departures and limits:
- **EFM table**: a stand-in with the right code set, as described above.
- **C1 and C2 naming**: C1 here is the first code decoded, the 32-byte one,
  and C2 the 28-byte one, as in the CD standard. The source once swaps the
  two lengths, but its decoding order (C1 first, then C2 with C1 flags) fixes
  which is which.
- **Not built**:
  - the RF slicer, the wide-range PLL and the servo DSP;
  - the ATAPI CD-ROM decoder with its DRAM;
  - the analog filter of the 1-bit DAC;
  - scan chains, which a DFT flow inserts into the netlist.

  The ports of the top stand where these would connect.
- **Not modelled**: the decoder pipeline timing shown in the source. Its
  stage overlap is reproduced, but not its absolute stage lengths.
- **Verification**: by simulation against independent bench models only. No
  recorded disc data was used.
