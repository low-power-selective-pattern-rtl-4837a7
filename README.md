# Selective pattern compression decoder for scan test

Scan test patterns produced by ATPG are mostly don't-care bits. Those bits
can be used in two ways, but not both at once: to make the test set
compress well, or to lower the switching power while patterns are shifted
in and captured. Selective pattern compression splits the test set by how
many don't-care bits each pattern has:

* **Power group.** Patterns with few don't-cares would not compress well
  anyway. Their free bits are filled to keep shift and capture transitions
  low, and they are sent to the chip uncompressed.
* **Compression group.** The other patterns are cut into equal segments of
  2^M bits. In every segment position, the segments of all patterns in this
  group are merged into a few fully specified patterns; all-don't-care
  segments become all zeros. Each segment position therefore gets its own
  small dictionary of at most 2^M entries. A pattern is then sent as one
  short codeword per segment.

This repository holds the on-chip half: a small serial decoder. It sits
between a single tester channel and a scan chain. It passes uncompressed
patterns through and expands compressed ones. The grouping, filling and
dictionary building run off-chip in software and are not part of this
RTL.

## Tester stream format

Every pattern starts with a **Select** bit.

| Select | what follows                                                  | scan bits produced |
|--------|---------------------------------------------------------------|--------------------|
| 0      | `SCAN_LEN` raw scan bits, first scan-in bit first              | `SCAN_LEN`         |
| 1      | one codeword per segment, segment 0 first; segment *i* uses `CW_LEN[i]` bits, most significant bit first | `NSEG * 2^M` |

`SCAN_LEN` is fixed to `NSEG * 2^M`, so both kinds of pattern load the same
chain. The widths of the codewords depend on the segment. A segment with 2
dictionary entries needs 1 bit, one with 3 or 4 entries needs 2 bits, and so
on up to M bits.

### The default dictionary (M = 3, five 8-bit segments, 40-bit patterns)

This is a small example set: 11 patterns of 40 bits. Two go to the power
group. The other nine are compressed with the dictionary below, which is
the default value of the `CODEBOOK` parameter (`rtl/lpspc_pkg.sv`).

| segment | width | code → pattern (first scan bit left) |
|---------|-------|--------------------------------------|
| 1 | 1 | 0 → 00000000, 1 → 00100001 |
| 2 | 2 | 00 → 00000000, 01 → 00010100, 10 → 00111000, 11 → 00001000 |
| 3 | 2 | 00 → 00000000, 01 → 10001101, 10 → 10001110 |
| 4 | 1 | 0 → 00000000, 1 → 10110000 |
| 5 | 2 | 00 → 00000000, 01 → 11000000, 10 → 11010000 |

The nine compressed patterns are sent as the 8-bit codeword strings
`10001001 00110000 01000001 00001110 01100100 11101000 10000000 00000001
01100001`. For example, `10001001` splits as `1|00|01|0|01`. Counting data
bits only, the 440-bit set becomes 72 + 80 = 152 bits. The Select bits add
one bit per pattern, 11 in all.

## Decoder structure

```
            din,fsmen ──► decoder_fsm ──ready──► (tester)
                              │  ├─ rst_cnt/inc/limits ──► bit_counter ──iflag/dflag──┐
                              │  ├─ seg, cw (Lindex) ──► pattern_gen ──pattern──┐     │
                              │  ├─ load/shift ─────────► seg_shift_reg ◄───────┘     │
                              │  └─ select ──┐                │ sout                   │
                              ◄──────────────┼────────────────┼────────────────────────┘
  din ──────────────────────────► dout_select(0)             │
                                 dout_select(1) ◄─────────────┘
                                      │
                                      └──► dout, dout_valid  (to the scan chain)
```

| module | role |
|--------|------|
| `lpspc_decoder` | top level; wires the five parts below |
| `decoder_fsm` | controller: Select bit, raw counting, codeword collection, load, shift, halt |
| `bit_counter` | one counter shared by the three counting jobs; `iflag` marks the last codeword bit and `dflag` the last raw or decoded bit |
| `pattern_gen` | combinational dictionary lookup, (segment, codeword) → 2^M bits |
| `seg_shift_reg` | 2^M-bit register, loaded in parallel and shifted out MSB first |
| `dout_select` | 2:1 selector: tester bit for raw patterns, shift register for decoded ones |
| `lpspc_pkg` | default sizes, the default dictionary, the controller state type |

The dictionary is a parameter, so synthesis turns it into fixed logic. A
chip is built for one test set. A different test set needs new
parameters, not new RTL.

## Controller sequence and timing

Everything runs on one system clock `clk`. The tester runs slower. It marks
each new bit by driving `din` with `fsmen = 1` for one system cycle, and it
may only do so while `ready = 1`. An assertion in `decoder_fsm` enforces
this.

```
START ──Select=0──► RAW ──(SCAN_LEN bits, dflag)──────────────────────────► START
  └────Select=1──► INDEX(seg) ──last codeword bit (iflag)──► LOAD ──► SHIFT ──dflag──┐
                      ▲                                                              │
                      └──────────── seg+1 (if seg < NSEG-1, else ──► START) ◄─────────┘
```

* **RAW**: each accepted bit goes to `dout` in the same cycle, with
  `dout_valid = 1`. The counter wraps to 0 on the last bit.
* **INDEX**: codeword bits are shifted into `cw`, most significant bit
  first.
* **LOAD**: takes one cycle. The shift register takes `pattern_gen(seg, cw)`.
* **SHIFT**: takes 2^M cycles, one decoded bit per cycle on `dout` with
  `dout_valid = 1`. `ready` is low here and in LOAD, so the tester halts.

A decoded segment starts on `dout` two cycles after its last codeword bit.
`pat_done` pulses with the last scan bit of every pattern.

**Rate.** Say the system clock runs at PHI times the tester clock. Each
codeword blocks the decoder for 2^M + 1 system cycles. With PHI = 2^M the
tester loses exactly one of its own cycles after each codeword. A group of
C codewords with B codeword bits in total then takes B + (C − 1) tester
cycles, plus one cycle per Select bit. In the example, the nine compressed
patterns take 72 + 44 + 9 = 125 tester cycles, against 9 × 41 = 369
uncompressed. The whole example set takes 207 tester cycles to deliver 440
scan bits. With a smaller PHI the tester simply waits more slots, because
the `ready` handshake makes the decoder correct at any clock ratio.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `M` | 3 | encoder size: segments of 2^M bits, codewords of at most M bits |
| `NSEG` | 5 | segments per pattern; `SCAN_LEN = NSEG * 2^M` (40) |
| `CW_LEN` | {1,2,2,1,2} | codeword width of each segment (1..M; checked at elaboration) |
| `CODEBOOK` | table above | `[0:NSEG-1][0:2^M-1][2^M-1:0]`, first scan bit is the MSB; unused entries are don't-care |

The larger experiments behind this scheme use M = 4 (16-bit segments) on
ISCAS'89 circuits with single scan chains of 214 to 1664 cells.
`tb/lpspc_decoder_iscas_tb.sv` builds the decoder at those sizes: 14, 16,
44, 39, 104 and 92 segments. The real dictionaries depend on each
circuit's test set and are not available, so that testbench generates its
dictionaries from a hash formula.

## Design choices and departures

These points are this implementation's choices. The scheme itself leaves
them open or states them loosely.

* **One clock domain.** Tester bits enter through the `fsmen` strobe. The
  decoder itself has no tester clock.
* **Handshake outputs.** `ready`, `dout_valid` and `pat_done` were added.
  The scheme only says that the tester idles between codewords.
* **Load cycle.** A separate one-cycle load state sits between a codeword
  and its decoded bits.
* **Counter limits.** The counter takes explicit limit inputs, so one
  counter serves the codeword width of each segment, the segment length and
  the pattern length.
* **Counter width.** The counter is ceil(log2(SCAN_LEN+1)) bits wide.
* **Segment flag.** The end-of-segment flag fires after 2^M decoded bits.
* **Bit order.** Bits run first-scan-in first everywhere. Codewords are sent
  most significant bit first.
* **Reset.** Reset is asynchronous and active-low. All registers clear to
  the START state.
* **Pattern length.** Compressed and raw patterns must have the same length,
  `NSEG * 2^M`. A scan chain whose length is not a multiple of 2^M needs
  padding.
* **Every segment has a codeword.** Each segment needs at least a 1-bit
  codeword, even one whose dictionary has only one entry.
* **Not included.** The synchronizer stage between the decoder and the scan
  chain, multiple scan chains, and the off-chip encoder are not included.
  `dout`/`dout_valid` are the outputs a synchronizer or scan chain would use.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `pattern_gen_tb` | every (segment, codeword) of the default dictionary, including codeword bits above a segment's width |
| `seg_shift_reg_tb` | random loads, MSB-first order, hold without shift, zero fill |
| `bit_counter_tb` | random increments/clears against a reference count, both flags, wrap |
| `dout_select_tb` | all 8 input combinations |
| `decoder_fsm_tb` | random raw and compressed patterns against a reference counter: bit counts, segment/codeword at every load, halt length, one `pat_done` per pattern |
| `lpspc_decoder_tb` | default size, end to end: the 11-pattern example at PHI = 8, bit-exact scan data and the 125-cycle compressed-group time; then 60 random patterns at PHI = 3. It also counts raw patterns, compressed patterns and tester halts. |
| `lpspc_decoder_iscas_tb` | M = 4 at the six ISCAS'89 scan lengths, via `lpspc_decoder_harness`: bit-exact data and the B + (C − 1) + Select-bit cycle count |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal rtl/lpspc_pkg.sv -y rtl -y tb +libext+.sv \
    tb/lpspc_decoder_tb.sv --top-module lpspc_decoder_tb
./obj_dir/Vlpspc_decoder_tb
```

Each testbench finishes in well under a second.

## Using it for another test set

1. Pick M, cut the compression-group patterns into `NSEG` segments of 2^M
   bits, and merge each segment position into at most 2^M patterns.
2. Set `CW_LEN[i]` to ceil(log2(entries of segment i)), with a minimum of 1.
3. Fill `CODEBOOK[i][c]` with the merged patterns, first scan bit as MSB.
4. On the tester, send `0` followed by the raw bits for each power-group
   pattern. For each compressed pattern, send `1` followed by its
   codewords. Offer bits only while `ready` is high.
