# Fast-update ternary CAM for FPGAs: MUX-Update and LUT-Update

A ternary content-addressable memory (TCAM) returns, in one clock, every
stored word that matches a search key. Each stored bit is 0, 1 or X, where X
("don't care") matches both key values. FPGAs have no TCAM cells, so an FPGA
TCAM has to be built from ordinary logic. Searching such a TCAM is fast.
Writing a new entry is often the slow part, because the memory that emulates
the TCAM has to be rewritten in many places.

This RTL holds a 64-word x 36-bit TCAM in a **gate-area-effective layout
(G-AETCAM)**: each ternary bit takes two flip-flops, a *store* bit and a
*mask* bit. The layout makes writing an entry a plain register write. On top
of it sit two alternative write paths:

| | MUX-Update | LUT-Update |
|---|---|---|
| input pins for data | 36 (one per bit) | 3 (`I0`, `I1`, `Ix`) |
| clocks per entry | 2 | WIDTH + 1 = 37 |
| depends on number of words | no | no |

The two designs are instantiated side by side in `tcam_update_top`. Each has
its own table and search port, and they share only clock and reset.

The demultiplexers in both write paths are built from the 3-input, 3-output
"R gate" of reversible logic. This was proposed as a low-power structure.
On an FPGA it synthesises to ordinary gates.

## Word layout and matching

A word of `WIDTH` ternary bits is stored as `2*WIDTH` bits:

| ternary bit i | bit 2i+1 (mask) | bit 2i (store) | code `{mask,store}` |
|---|---|---|---|
| 0 | 0 | 0 | `00` |
| 1 | 0 | 1 | `01` |
| X | 1 | 0 | `10` |

The store bits sit at the even positions `[70:2:0]` and the mask bits at the
odd positions `[71:2:1]`. Bit i of a word matches key bit `S_w[i]` when its
mask bit is 1 or its store bit equals `S_w[i]`. A word's match line `M_L[w]`
is the AND of its 36 bit matches. All 64 words are compared in parallel.

`g_aetcam` registers both results: the 64 match lines `m_l`, and the
per-word 36-bit match vectors `bit_match` (useful for debug). Both are valid
one clock after the key is applied. A search in the same clock as a write
sees the table before the write. Reset (`rst_n`, active low) clears every
word to 0...0 with no X bits. Searching such a cleared table with key
`0003c0001` therefore returns the bit-match vector `fffc3fffe` for every
word.

No priority encoder is included. The match lines are the output.

## MUX-Update: two clocks, 36 pins

An entry is written in two clock cycles to word `addr`. In both cycles
`upd_valid` must be 1.

1. **Storing cycle** (`sm = 0`): `din` carries the entry's value bits. Any
   value can be used at X positions. The whole 72-bit word is written: store
   bits from `din`, mask bits cleared. This removes whatever the word held
   before.
2. **Masking cycle** (`sm = 1`): `din` carries the mask vector, with 1 at
   every X position. Only the odd bits are written, so the store bits stay
   as they are.

Each pin goes through a 1-to-2 demultiplexer, one R gate per bit with A = `sm`,
B = `din[i]` and C = 0. The gate's Q output (`sm=1`) drives the odd bit and
its R output (`sm=0`) drives the even bit. `mux_update` is combinational, so
each half-word lands in the table at the edge that ends its cycle. A search
issued in the clock after the masking cycle finds the complete entry.
Between the two cycles the entry is visible with no X bits.

## LUT-Update: one ternary bit per clock on three pins

`lut_update` takes one ternary bit per clock that has `in_valid = 1`. The bit
comes in one-hot form on `{Ix, I1, I0}`: `001` for 0, `010` for 1, `100` for
X. The steps are:

1. **Bit-select memory (`bsm`).** Two 3-input lookup tables map the pins to
   the bit's `{mask, store}` code. The five pin patterns that are not one-hot
   give `00`, so they are stored as a 0.
2. **Counter and demultiplexer.** A 6-bit counter counts the bits of the
   entry, 0 to WIDTH-1, and wraps after the last bit. Through a 1-to-64
   demultiplexer (`rev_demux64`), the counter selects the pair
   `BR[2i+1:2i]` of the 72-bit **buffer register (BR)** that receives the
   code. The demultiplexer carries three 1-bit lanes: the two code bits and
   a load strobe. Only the pair selected by the strobe changes. Outputs
   36..63 are unused.
3. **Commit.** In the clock after the last bit, the whole BR is written to
   word `addr` of the table. `addr` is sampled together with the last bit.
   `upd_done` (in `lut_update_tcam`) is high during that clock. A search
   issued in that clock or later sees the new entry.

An entry therefore takes WIDTH+1 clocks from its first bit to the commit,
which is 37 clocks at WIDTH = 36. Bit i must be the i-th valid bit. Idle
clocks (`in_valid = 0`) may come between bits. The next entry may start in
the commit clock, because the table takes the BR contents from before that
edge. Sustained throughput is therefore one entry every WIDTH clocks.

Worked example at WIDTH = 4, for the entry `10X1` written with bit 3 first.
Bit 0 is sent first: pins `010`, `100`, `001`, `010`. The BR becomes
`01 00 10 01` (bit 3's pair first), and the table is written at the fifth
clock edge. `tb_lut_update` checks exactly this.

## Reversible demultiplexers

`r_gate` implements P = A, Q = A·B, R = A'·B + A·C. With C = 0 it is a 1-to-2
demultiplexer with a garbage output P.

`rev_demux4` uses three R gates:
- The first gate splits I on S1.
- Its Q output feeds the upper gate, which gives Z3 and Z2.
- Its R output feeds the lower gate, which gives Z1 and Z0.
- S0 drives both second-level gates.

`rev_demux64` is a three-level tree of `rev_demux4` (1 → 4 → 16 → 64, 21
instances). The most significant select pair drives the root.

One caveat: the R-gate equations above are not one-to-one over all eight
input patterns, because when A = 0 the C input reaches no output. So, taken
alone, the gate is not strictly reversible. In the way it is used here
(C = 0), the four (A, B) patterns give distinct outputs. The equations are
kept as specified because they are what makes the demultiplexer correct.

## Modules

| module | role |
|---|---|
| `tcam_pkg` | default sizes (64, 36) and the `{mask,store}` code enum |
| `r_gate` | R gate |
| `rev_demux4` | 1-to-4 demultiplexer from three R gates |
| `rev_demux64` | 1-to-2^SEL_W demultiplexer tree (SEL_W = 6, must be even) |
| `bsm` | bit-select memory: pins → code |
| `g_aetcam` | DEPTH x WIDTH table, write port with bit enables, registered search |
| `mux_update` | MUX-Update write path (combinational) |
| `mux_update_tcam` | `mux_update` + `g_aetcam` |
| `lut_update` | LUT-Update write path: BSM, counter, demultiplexers, BR, commit |
| `lut_update_tcam` | `lut_update` + `g_aetcam` |
| `tcam_update_top` | both designs side by side, ports prefixed `mux_` and `lut_` |

Parameters: `DEPTH` (words, default 64) and `WIDTH` (ternary bits per word,
default 36) on every table-level module. `lut_update` also has `CNT_W`
(counter width, default 6), which needs WIDTH ≤ 2^CNT_W and an even CNT_W.

At the defaults, the top synthesises (generic yosys cells) to about 10k
word-level cells and 14k flip-flop bits. Most of these are the two tables and
their registered per-bit match vectors. Dropping `bit_match` would save
2 x 2304 flip-flops.

## What is this design's own choice

The following are not fixed by the specification the design follows. They
are reasonable choices that can be changed:

- The write address ports (`addr`) and the `upd_valid`/`in_valid` handshakes.
- The G-AETCAM write port with per-bit enables.
- The table as a flip-flop array with registered outputs.
- Active-low asynchronous reset that clears the table.
- The storing cycle clearing the mask bits. The specification starts an
  update from an all-zero word, and this is how that is done here.
- Using R gates for the MUX-Update 1-to-2 demultiplexer.
- Building the 1-to-64 demultiplexer as a tree of 1-to-4 ones.
- The load-strobe lane.
- Sampling `addr` with the last LUT-Update bit.
- Treating non-one-hot pins as 0.

These points are fixed by the specification:

- The word layout.
- The two-cycle storing/masking scheme.
- The BSM table contents.
- The counter-driven BR filling.
- The WIDTH+1 latency.
- The R-gate equations and the 1-to-4 structure.

The LUT-Update path needs WIDTH+1 clocks and three pins, and MUX-Update needs
two clocks and WIDTH pins. This is the opposite pairing from one summary of
the mechanism, which credits MUX-Update with WIDTH+1 clocks on three pins.
The block diagrams and the detailed descriptions agree with this RTL.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
Example with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/tcam_pkg.sv tb/tb_tcam_ref.sv tb/tb_tcam_update_top.sv \
    --top-module tb_tcam_update_top -o sim
./obj_dir/sim
```

Substitute any `tb/tb_<module>.sv` to test one module. `tb/tb_tcam_ref.sv`
is a reference model: each word is held as a value vector plus a don't-care
vector, independent of the hardware's interleaved layout.

- `tb_tcam_update_top` runs both designs at full size (64 x 36) for 6000
  clocks, with a search on every clock. It compares every match line and
  bit-match vector against the model. It also counts, and requires, each of
  the following: storing and masking cycles, a search between them, LUT bit
  loads, commits, idle clocks inside an entry, back-to-back entries,
  non-one-hot pins, multiple matches, misses, and matches that need an X.
- `tb_g_aetcam`, `tb_mux_update_tcam` and `tb_lut_update_tcam` test the
  tables with random entries.
- `tb_lut_update` checks the BR contents bit by bit and the WIDTH+1 commit
  timing, at WIDTH = 4 and 36.
- The gate-level pieces (`tb_r_gate`, `tb_rev_demux4`, `tb_rev_demux64`,
  `tb_bsm`) are tested exhaustively.

Each full-size run takes about a second.

## Known warnings

- Verilator reports `SYNCASYNCNET` on `rst_n`. The reset is asynchronous in
  the flops, and it is also used synchronously in the `disable iff` of the
  counter-range assertion in `lut_update`.
- `lut_update_tcam` leaves the `br` and `cnt` observation outputs of
  `lut_update` unused.
