# Region-Chunk cache line compressor (R16C64)

Synthesizable SystemVerilog for the Region-Chunk compression scheme described
in "Conciliating Speed and Efficiency on Cache Compressors". Source comments
refer to that description as "the published scheme".

A compressed last-level cache needs a line compressor that shrinks lines well
and also decompresses fast, because decompression sits on the hit path.
Base-delta compressors (BDI-style) decompress in one cycle, but they compress
poorly: they assume a whole 32- or 64-bit value either matches a base or does
not. Richer pattern compressors do better but take several cycles.

This RTL applies **Region-Chunk compression** to make a fast base-delta design
compress better. Each 64-byte line is read as eight 64-bit *chunks*. Each chunk
is cut into four 16-bit *regions*. Region *r* of all eight chunks forms a
*region line*: eight 16-bit values that sit at the same position in their
chunks. The four region lines are compressed independently, then packed
together. The upper halves of 64-bit values (pointers, small integers, sign
extensions) usually repeat and shrink to almost nothing. The low halves are
compressed separately, so one region that varies a lot does not spoil the
others. Each region has its own small choice of simple base-delta
sub-compressors. All of them rebuild a region line with one combinational
step.

```
  64-byte line ──rewire──► region line 3 ─► region_compressor ─┐ enc, size, payload
  (8 × 64-bit chunks)      region line 2 ─► region_compressor ─┤
                           region line 1 ─► region_compressor ─┤
                           region line 0 ─► region_compressor ─┘
                                                 │  (register)
                                                 ▼
                           rc_concat: prefix-sum adders + shifters
                                                 │  (register)
                                                 ▼
               compressed line = [enc0 enc1 enc2 enc3 | payload0 | payload1 | payload2 | payload3]
```

Region *r* of chunk *c* is bits `[64c + 16r +: 16]` of the line. Region line
*r* holds chunk *c* at bits `[16c +: 16]`.

## The base-delta sub-compressor, C_w I_x E_y D_z

The building block is a generic base-delta compressor (`bd_compressor`). It
parses a line as N chunks of w bits and keeps a dictionary of at most **x
implicit** bases and **y explicit** bases. Each chunk keeps **z delta bits**.
The only implicit base is the all-zero value (x is 0 or 1), and it is never
stored.

Bases are compared on their non-delta bits only. A base's delta bits are
assumed to be zero, so they are not stored. Chunks are parsed in order. A
chunk whose non-delta bits equal those of an existing dictionary entry points
to that entry. Otherwise, if fewer than y explicit bases exist, the chunk
opens a new one. If neither is possible, the line does not fit. Every chunk,
including one that opens a base, stores its own z delta bits unchanged. The
rebuilt chunk is then the base's non-delta bits with the chunk's delta bits
filled in: no adders are involved.

Example, C32 I1 E1 D8, chunks `0x01234567` and `0x01234568`: the stored base
is `0x012345`, both pointers name it, and the deltas are `0x67` and `0x68`
(42 bits in all).

Pointers shrink at the start of the line. When chunk *c* (0-based) is parsed,
the dictionary can hold at most `x + min(c+1, y)` entries. So its pointer is
`ceil(log2(x + min(c+1, y)))` bits wide, and 0 bits if only one entry is
possible. With I1 E2 the pointers are 1, 2, 2, 2, … bits.

The number of bases, pointers and deltas is fixed. So **every sub-compressor
has a constant compressed size**, known when the hardware is built.

Payload layout, LSB first:

| field | width |
|---|---|
| y explicit bases | y × (w − z) (unused bases are zero) |
| pointer of chunk 0 … N−1 | as above |
| delta of chunk 0 … N−1 | N × z |

`DELTA_MASK` chooses *which* bits of a chunk are delta bits. It defaults to
the z least-significant bits. It can move them, for example to bytes 0 and 2
(`0x00FF00FF`), to suit 16-bit data packed in 32-bit chunks. With that mask,
`0x01234567` stores base bits `0x0145` and delta `0x2367`.

The **stride compressor** (`stride_compressor`) is the other kind of
sub-compressor. It accepts a region line whose values form an arithmetic
sequence, value *n* = base + *n* × stride modulo 2^w. The stride must fit a
signed z-bit number. It stores `{stride, base}`.

## Region compressor: choosing a sub-compressor

`region_compressor` runs seven sub-compressors in parallel on one region line
and picks the smallest one that fits. Ties go to the lower encoding, which
cannot happen with the sizes below. The 3-bit encoding 7 means "stored
uncompressed". The set is defined in `rc_pkg::sub_cfg` as a function of the
region width RW. For the default RW = 16 with 8 values per region line:

| enc | sub-compressor | payload bits | covers |
|---|---|---|---|
| 0 | C16 I1 E0 D0 | 0 | all zeros |
| 1 | C16 I0 E1 D0 | 16 | one repeated value |
| 2 | C16 I1 E0 D8 | 64 | values below 256 |
| 3 | C16 I1 E1 D4 | 52 | zero or one base, 4-bit deltas |
| 4 | C16 I1 E1 D8 | 80 | zero or one base, 8-bit deltas |
| 5 | C16 I1 E2 D8 | 95 | zero or two bases, 8-bit deltas |
| 6 | stride, 8-bit stride | 24 | arithmetic sequences |
| 7 | uncompressed | 128 | anything |

This set is a design choice of this implementation, not a tuned one. The
region-chunk scheme leaves the choice of sub-compressors open, and each
region could have its own set. Here all four regions use the same set. To
change the set, edit `sub_cfg` (and `ENC_W` if the count changes). The
compressor, the decompressor, the size tables and the reference model in
`tb/tb_ref_pkg.sv` are the only places that depend on it.

## Compressed line and where the encodings live

The region payloads are concatenated with region 0 first. `rc_concat` finds
each region's offset by adding up the sizes of the regions before it (an
adder chain), then shifts the payload into place. `rc_extract` does the
reverse when decompressing. The result depends on `ENC_IN_TAG`:

- **`ENC_IN_TAG = 0` (default), encodings in the data entry.** A 12-bit header
  (region *r* at bits `[3r +: 3]`) comes before the payloads. The compressed
  line is 12 to 524 bits. The decompressor must first read the header before
  it knows where each region starts.
- **`ENC_IN_TAG = 1`, encodings in the tag.** There is no header. The
  encodings leave on `enc_o` for the tag array and come back on `enc_i`. The
  offsets can then be computed while the data is still being read, so
  decompression is a single cycle. This costs 3 tag bits per region. That is
  cheap with one or two regions, and heavier for R16C64.

`size_o` is the compressed size in bits, header included. The cache's
allocation logic decides from it how to place the line, or whether to keep
the line uncompressed. A fully incompressible line reports 524 bits.

## Timing

All blocks accept one line per clock. There is no back-pressure. `valid` is
the only flow signal, and the reset (`rst_ni`, synchronous, active low) clears
only the valid pipeline.

| path | latency | stages |
|---|---|---|
| compress | 2 cycles | region compressors + selection → register; concatenation → register |
| decompress, encodings in data entry | 3 cycles | header decode and size lookup → register; payload shift-out → register; sub-decompression and rewiring → register |
| decompress, encodings in tag | 1 cycle | shift-out, sub-decompression and rewiring → register |

These latencies are the ones the scheme targets: 1 cycle with the encodings in
the tag, and 3 cycles with them in the data entry. The compression latency and
the way the work is split across pipeline stages are choices of this design.

## Modules

| module | role |
|---|---|
| `rc_pkg` | constants (`ENC_W`=3, `NUM_SUB`=7), sub-compressor set, size and offset functions |
| `bd_compressor`, `bd_decompressor` | C_w I_x E_y D_z compressor and its single-step inverse |
| `stride_compressor`, `stride_decompressor` | stride sub-compressor pair |
| `region_compressor`, `region_decompressor` | multi-compressor of one region line, and its decoder |
| `rc_concat`, `rc_extract` | place / extract region payloads (adders and shifters) |
| `rc_compressor`, `rc_decompressor` | full-line Region-Chunk compressor and decompressor |
| `rc_codec` | top: one compressor and one decompressor side by side |

Parameters of the line-level modules: `LINE_BITS` (512), `CW` chunk width
(64), `RW` region width (16), `ENC_IN_TAG` (0). Region-chunk configurations
R8C32, R16C32, R32C32, R8C64, R16C64, R32C64 and R64C64 have all been
simulated, with and without the tag placement. `CW` = `RW` gives
conventional, single-region compression. The sub-compressor set scales
with RW (delta widths RW/2 and RW/4). Chunks wider than 64 bits are not
supported, because the delta mask is built in 64 bits.

## Not included

- The compressed L3 itself, its tag and data arrays and its compaction
  layout. `rc_codec` only brings out the signals that would connect to them.
- The comparison compressors (BDI, FPC-D) and their combination with the
  region scheme.
- Tuned, per-region sub-compressor sets, and variants that shave one delta bit
  from selected sub-compressors (e.g. D32 → D31 on 64-bit chunks) so that
  lines pair better in the compaction layout.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs. `tb_rc_codec` runs the top at its default parameters. It writes 256
lines, reads them back 512 times in a different order, and checks that every
region encoding, an all-zero line, an incompressible line, a line that fits in
half a line, and back-to-back operation each occurred at least once.
`tb_rc_configs` runs the same stream through eleven configurations and prints
their average compressed sizes.

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/rc_pkg.sv tb/tb_ref_pkg.sv tb/tb_rc_codec.sv --top-module tb_rc_codec
./obj_dir/Vtb_rc_codec
```

The other testbenches are built the same way (`tb_bd_compressor`,
`tb_stride_compressor`, `tb_region_compressor`, `tb_rc_concat`,
`tb_rc_compressor`, `tb_rc_configs`). The packages must come first on the
command line.

The expected encodings and sizes come from `tb/tb_ref_pkg.sv`. It decides,
with its own counting rule and hand-computed sizes, which sub-compressor must
win for each region line.
