# Electrical driver for a 256 x 256 optical vector-by-matrix multiplier

An optical vector-by-matrix multiplier (VMM) lets light do the arithmetic. A row
of 256 lasers (VCSELs) shows an input vector A as 256 intensity levels. Lenses
spread the light of laser *i* over column *i* of a spatial light modulator (SLM).
The SLM is a 256 x 256 grid of pixels, and each pixel passes a fraction of the
light set by an 8-bit matrix element. A second set of lenses sums each SLM row
onto one photodetector. Detector *j* therefore sees

    c_j = sum_{i=0..255} a_i * b_{j,i}

and the 256 detectors together give C = A x Bᵀ. This happens once per 8 ns
optical frame (125 MHz), for 8-bit unsigned elements and a 20-bit result per
row.

The optics finish a full 256 x 256 product every frame. The hard part is the
electronics. They must load a whole new matrix (64 KiB) into the modulator
every 8 ns, or the optics sit idle. This RTL is that electronics. It is split
into 256 identical *single electrical drivers* (SEDs), one per SLM row. Each SED
has its own 256-bit input bus and its own small buffer. Sixteen SEDs share one
ALU chip, and sixteen ALU chips sit on one interface board. The optical parts
(SLM row, lenses, detector) are a behavioural model, so that the design
simulates end to end.

## Structure

```
vmm_top
├── frame_timer            beat / frame strobes from the bus clock
├── row_source_driver      A bus -> VCSEL drive codes (vcsel_drive)
├── interface_board        16 independent ALU elements
│   └── alu_element  x16
│       ├── alu_bus_distributor   2048 data + 128 synch lines -> 16 x 256-bit words
│       └── sed  x16              one SLM row
│           ├── sed_buffer        2048-byte vector FIFO (dp_ram inside)
│           └── slm_row           behavioural model: SLM row + detector
└── c_output_collector     256 x 20-bit results -> 640-bit output bus
```

`vmm_pkg` holds the sizes, the timing constants and the SED command type.
SED *m* of ALU element *e* drives SLM row *j* = 16e + m. Every per-SED array
on the top level is indexed by *j*.

## Time: clocks, beats and frames

There is one clock, `clk`, which stands for the 2 GHz ALU bus clock.

- A **beat** lasts two clocks and stands for the 1 GHz rate of the SEDs and the
  256-bit buses. `ce` is high on the second clock of each beat, and
  `frame_timer` drives it.
- A **frame** is 8 beats (8 ns, 125 MHz). A 256-element x 8-bit vector is
  2048 bits, which is exactly 8 words of 256 bits. So on every bus, one vector
  takes one frame. `beat` (0..7) numbers the beats. `frame_end` is `ce` on
  beat 7.

Everything that the optics see changes only on `frame_end`: the laser codes,
the SLM rows and the detector read-out. Each change is double-buffered. Words
collect in a staging register during a frame and move to the output register
all at once. The resulting pipeline, for data sent in frame *f*:

| frame | what happens |
|-------|--------------|
| f     | A arrives on the A bus and rows B_j on the element buses, one word per beat. Each SED gets its command on beat 0. |
| f+1   | Lasers show A, SLM row *j* shows B_j, and detector *j* integrates. At the end of the frame c_j is sampled. |
| f+2   | SEDs whose command has `write_c` present c_j from beat 0 on. The output bus sends C as 8 words, after beats 1..7 of f+2 and beat 0 of f+3. |

Throughput is one full product per frame, with a new A and a new matrix every
frame. Latency is two frames from the first input word to the first output
word.

## The SED and its four operations

Each SED accepts one command per frame (`vmm_pkg::sed_cmd_t`, sampled with
`ce` on beat 0):

| field | operation |
|-------|-----------|
| `buf_write = 1` | **a**: the 8 words of B_j arriving this frame go into the buffer |
| `slm_src = SLM_FROM_EXT` | **b**: the same 8 words become the next SLM row |
| `slm_src = SLM_FROM_BUF` | **c**: the oldest buffered vector becomes the next SLM row |
| `slm_src = SLM_HOLD` | the SLM keeps its row (for example, matrix reuse with a new A every frame) |
| `write_c = 1` | **d**: put the last detector result on `c_out` for this frame |

Operations a and c may run in the same frame, because the buffer is dual-ported.
Operations a and b may also run together: the same words go both to the buffer
and to the SLM.

**The buffer** (`sed_buffer`) holds 2048 bytes, which is 8 whole vectors. It is
a FIFO. Words are written at offset `beat` inside the next free vector slot. That
slot joins the FIFO only at `frame_end`, and only if all 8 words of the frame
were valid. A vector that arrives incomplete is therefore never seen. Reads
work the same way: the oldest vector is read one word per beat and is released
at `frame_end`. The RAM has a synchronous read port. The read address is
stable for the whole beat, so the word reaches the SED on the beat's `ce`
clock. This is why there must be at least two clocks per beat.

**Refusals.** Three cases are refused, and each one pulses an error output for
one beat:

- **`err_overflow`**: a buffer write while 8 vectors are stored. The write is
  dropped.
- **`err_underflow`**: a buffer read with nothing stored. The SLM holds its row.
- **`err_data`**: operation a or b in a frame where a word was not valid. The
  vector is dropped from the buffer, or from the SLM, or from both.

`buf_count` reports how many vectors are stored.

## Buses

**A bus** (`a_data`, 256 bits): word *k* of a frame carries elements
32k..32k+31. Element 32k+m is in bits [8m+7:8m]. Each word needs `a_valid`. A
frame that lacks a word leaves the lasers unchanged and pulses `a_incomplete`.

**ALU element bus** (`bus_data[e]`, 2048 lines, plus `bus_sync[e]`, 128 lines):
sixteen SEDs need 16 x 256 = 4096 bits per beat. The bus sends them in the
beat's two clocks:

- First clock: SEDs 0–7.
- Second clock: SEDs 8–15.

SED 8p+m sits in bits [256m+255:256m] of clock *p*. Each synch line covers 16
data lines, so each SED word has 16 synch lines:

- All 16 high: the word is valid.
- All 16 low: the word is absent.
- A mix: the word is treated as invalid, and the element's `sync_err` pulses.

The distributor holds the first slice and takes the second slice straight off
the bus. This adds no beat of latency.

**Output bus** (`c_bus`, 640 bits): C is 256 x 20 = 5120 bits, so it takes 8
words. Word *g* (`c_bus_group`) carries the results of SEDs 32g..32g+31, with
SED 32g+m in bits [20m+19:20m]. `c_bus_mask[m]` says whether that SED wrote its
result this frame. `c_bus_valid` is high when any mask bit is set.

## The optical model and the 20-bit result

`slm_row` is a model, not a circuit. It stands for the 256 modulator pixels of
one row, the row-summing lens and detector *j*. At every `frame_end` it
computes the exact sum of the 256 products of the laser codes (`light`) and
the pixel codes (`drive`). It then reads the sum out as 20 bits.

The exact sum can reach 256 x 255 x 255, which needs 24 bits. The model maps
the detector's full scale onto the 20-bit range by dropping the 4 least
significant bits (`C_SHIFT = 4`). Two consequences follow:

- Results are exact only to within 16.
- A single 8 x 8 product is not returned exactly.

Any other read-out, such as saturation, or guard bits that give exact 16-bit
products, can replace this one in `slm_row` alone. The lasers and lenses have
no model of their own. The drive code of laser *i* is used directly as the
light level on SLM column *i* of every row, and the codes are also output as
`vcsel_drive`.

## Where this RTL departs from, or adds to, the published design

- **SEDs per ALU element: 16.** The block diagram of the ALU element and the
  board organisation (16 chips x 16 SEDs = 256 rows) both use 16. One passage
  of the description assumes 8 per element. With 8, sixteen elements would give
  only 128 rows. Also, a 2048-line bus at 2 GHz carries exactly 16 x 256 bits at
  1 GHz.
- **Bus rate.** The published ALU bus has 2176 lines at 2.4 GHz. That is 2048
  data lines plus 128 synch lines, and the extra 20% of rate carries error
  correction and handshaking. That protocol is not specified, so it is not
  built. The RTL models the 2 GHz payload, and the synch lines act as per-word
  valids.
- **Commands.** The operations a–d come from the published design. How they
  reach an SED does not. Here they are a per-SED command port, sampled once per
  frame.
- **One clock.** The published design synchronises the SEDs and the ALU
  elements with a clock tree of under 50 ps skew. Here everything shares one
  clock, with a beat enable.
- **Double-buffering and refusal rules** (staging registers, commit at frame
  end, overflow, underflow and incomplete-vector handling) are this design's
  own choices.
- **Not built:**
  - Updating the SLM from the buffer faster than the frame rate, for example
    2 rows per frame for complex arithmetic. This is only proposed as future
    work.
  - The host system: the RISC/DSP controller, memory, other co-processors and
    a vector shuffle engine. These are only named.
  - Packaging.
- **Results** are 20 bits with the scaling described above.

## What the design can run

The design can run a general 1x256 by 256x256 product at 125 MHz. Larger
workloads are built from it:

- **Matrix by matrix.** Hold the matrix with `SLM_HOLD` and send its partner's
  256 rows as A, one per frame.
- **Several small matrices at once.** Place them block-diagonally in the 256
  columns.
- **Dot products, convolution, FIR, DCT.** Put the coefficient or shifted
  vectors in the SLM rows.
- **L2 distances.** All 256 rows share one A. So |a − b_j|² is built as
  a·a − 2·a·b_j + b_j·b_j: the optics give a·b_j, and the host adds the
  squared norms.
- **Motion estimation.** A 32x48 search window holds 1536 candidate
  macro-blocks. That is 6 matrices, which fit in the 8-vector buffers: load them
  with operation a, then replay them with operation c.

Workloads that need exact 8 x 8 partial products, for example 24-bit mantissas
built from 9 partial products, do not fit. The 20-bit read-out is not exact.

## Verification

Each testbench in `tb/` checks itself. At the end it prints
`TB_RESULT checks=N failures=M`, and it has a cycle watchdog.

| testbench | covers |
|-----------|--------|
| `tb_frame_timer` | `ce` every 2 clocks, beats 0..7, `frame_end` every 16 clocks, restart after reset |
| `tb_row_source_driver` | vector assembly, commit only at frame end, hold and `a_incomplete` on a missing word |
| `tb_sed_buffer` | FIFO order over pointer wrap-around, fill to 8, simultaneous read and write, uncommitted writes invisible |
| `tb_slm_row` | dot product against an independent sum: full scale, single product, all-ones summation, random |
| `tb_sed` | operations a–d, overflow, underflow, incomplete vectors, result timing, against a frame-level model |
| `tb_alu_bus_distributor` | slice-to-SED mapping, valid from the synch lines, `sync_err` |
| `tb_c_output_collector` | word order, group numbering, masks, timing relative to the frame |
| `tb_alu_element` | one element (16 SEDs) with random per-SED commands and bad synch lines |
| `tb_interface_board` | the board at 2 elements, checking that the elements stay independent |
| `tb_vmm_top` | the whole design at its default size: see below |
| `tb_vmm_workloads` | six applications run on the default-size design: see below |

`tb_vmm_top` runs 52 frames. It covers streaming (a new A and a new matrix
every frame, with a check that finished products leave exactly 16 clocks
apart), buffer loading up to overflow, and matrix reuse from the buffers down
to underflow. After that, every SED gets random mixed commands, with missing
words, bad synch lines and incomplete A vectors. The bench checks:

- every output word;
- the laser drive and all 256 buffer counts after every frame;
- that the count of every error event matches its model.

It runs in a few seconds.

`tb_vmm_workloads` drives the default-size design the way a host would, one
frame at a time, and checks the results of whole applications. It runs 297
frames in total:

- **Matrix x matrix.** A random 256 x 256 matrix is held in the SLM while the
  256 rows of a second matrix stream through A.
- **4x4 products.** 64 pairs of 4x4 products are packed block-diagonally and
  finish in 4 frames.
- **Convolution.** A 256-tap mask is run against 256 shifts of a 511-sample
  signal in one frame.
- **Motion estimation.** 1536 candidate 16x16 blocks of a 32x48 window are
  loaded into the buffers as 6 matrices, replayed against the current block,
  and the best match is picked.
- **Complex product.** The four real products U·X, U·Y, V·Y and V·X are
  computed, with Y replayed from the buffers. The host combines them.
- **L2 distances.** The distances from one vector to 256 others are computed
  in one frame. The optics give a·b_j, and the host adds the squared norms.

Single results must equal the exact sum with its 4 low bits dropped. Values
that the host combines must lie within the matching tolerance.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl \
    rtl/vmm_pkg.sv tb/tb_vmm_top.sv --top-module tb_vmm_top
./obj_dir/Vtb_vmm_top
```

Substitute any other testbench name. Parameters such as `N_ALU`,
`SEDS_PER_ALU` and `BUF_BYTES` can be reduced on `vmm_top` for experiments.
They must keep the widths consistent: a vector must fill the buses in a whole
number of beats, and the buffer must hold a power-of-two number of vectors.
Assertions check these rules when simulation starts.
