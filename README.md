# Hardware rate control for a JPEG2000 encoder (EBCOT Tier-2)

A JPEG2000 encoder codes every 32x32 code-block of the wavelet-transformed tile into an
embedded bit-stream. That stream can be cut after any coding pass. Rate control then
chooses where to cut each code-block so that the whole tile fits a byte budget with the
least distortion. The standard way to do this (PCRD-Opt) keeps every code-block's
rate-distortion data and searches for a Lagrange multiplier by bisection. That loop has
no fixed bound and suits software better than hardware.

This RTL does the job with a **slope table** and no loop. As each code-block finishes,
the bytes of each of its segments are added to a table indexed by the segment's
rate-distortion slope. One pass over the table from the steepest slope down then gives
the threshold: the lowest slope whose segments, together with all steeper ones, still fit
the budget. Each code-block is cut after its last segment at or above that threshold.
The result is a 32-bit header word per code-block (data length, pass count, zero
bit-planes), written to the coprocessor's SSRAM. The host CPU builds the packets from
these words.

The block sits in a platform of an ARM CPU, an AHB-Lite bus and a coprocessor with its
own ZBT SSRAM. The wavelet transform and the Tier-1 entropy coder sit in front of it and
are **not** part of this RTL. Their outputs reach Tier-2 through ports.

## From bit-planes to hull points

After each coded bit-plane, Tier-1 reports two running totals for the code-block:

* `D`: distortion reduction so far (32 bit)
* `R`: bytes so far (16 bit)

Distortion is only estimated at the end of a whole bit-plane, after its cleanup pass. So a
code-block can only be cut at bit-plane boundaries. The n-th point therefore stands for
the first n coded bit-planes, which hold `3n - 2` coding passes (the first coded bit-plane
has only a cleanup pass).

A point is useful only if it lies on the upper convex hull of the code-block's (R, D)
curve, so that slopes fall strictly along the code-block. Each slope calculation channel
(`t2_slope_calc`) keeps that hull on a stack of at most `MAX_PTS` = 8 points. Every new
point goes through three steps:

1. **Subtraction.** It computes `dD`, `dR` against the top of the stack, or against the
   origin if the stack is empty.
2. **Division.** It computes `slope = dD / dR` with a bit-serial divider, as an unsigned
   32-bit integer quotient taking 32 clocks. If `dR <= 0` (gain for no bytes), the slope
   is infinite.
3. **Comparison (hull cancellation).**
   * If `dD <= 0`, the point adds bytes but no quality. It is dropped.
   * If the new slope is `>=` the slope of the point below it, that point is not on the
     hull. It is popped and the new point goes back to step 1 against the next point
     down. This repeats as often as needed, so an infinite-slope point always merges
     with its predecessor.
   * Otherwise the point is pushed.

### Slope bins

The table cannot have an entry for each 32-bit slope value. Slopes are therefore mapped
to 256 logarithmic bins by `t2_pkg::slope_bin`:

* Slopes 0 to 7 map to bins 0 to 7.
* Above that, with `e` the position of the leading one, the bin is
  `8*(e-2) + (3 bits below the leading one)`. The largest finite slope maps to bin 239.
* Bin 255 means infinite.

The mapping is monotonic, so bin order is slope order. The resolution is about 12% per
bin. Cancellation compares exact slopes; only the threshold works on bins.

## The slope table and the threshold

When a code-block ends (`cb_done`), its channel offers the finished hull. The renew unit
(`t2_renew_table`) walks the hull one point per clock:

* it adds the segment bytes `R(i) - R(i-1)` to `table[bin(i)]`;
* it copies the point into a per-code-block store (16 code-blocks x 8 points of
  `{R, bin, n}`) for the later cut.

Channels that finish at the same time are served one after another, lowest channel first.

The threshold generator (`t2_threshold_gen`) reads the table from bin 255 down, adding up
bytes. It stops at the first bin that would push the total above the budget. The
threshold is that bin + 1.

* The budget is `TILE_BYTES >> cr`. The 3-bit `cr` input is the compression ratio as a
  power of two: a 128x128 8-bit tile at `cr = 6` (ratio 64) gets 256 bytes.
* If the whole table fits, the threshold is 0. If not even bin 255 fits, it is 256.
* `bytes_kept` reports the bytes the threshold admits, which never exceed the budget.

Bins run in the same order along every hull. So cutting each code-block after its last
point with `bin >= threshold` keeps exactly the segments the table counted. This is the
job of the truncation unit (`t2_rd_opt`). It produces, per code-block in number order,
the header word

    [31:16] CDL  bytes kept     [15:8] NCP  passes kept (3n-2, or 0)     [7:0] NZB

The data formation unit (`t2_data_formation`) queues these words in a 4-deep FIFO. It
writes each one to the SSRAM at `0xC2028000 + 256*cb + 252`: the last word of that
code-block's 256-byte record in the rate/distortion area `0xC2028000`-`0xC2029000`. The
coded bytes themselves stay where Tier-1 put them (256 bytes per pass and code-block from
`0xC2010000`). CDL says how many of them belong in the code-stream.

## Two modes: IPCRD-Opt and RTRD-Opt

`mode` selects between two schemes that share all of the hardware above.

* **IPCRD-Opt (`mode = 0`)** is meant for the quad-code-block (QCB) wavelet transform.
  That transform processes the tile in quarters and hands Tier-1 three code-blocks at a
  time. The least important code-blocks come first and the LL band comes last. All
  three channels are used, and the threshold is computed once, after all `NUM_CB`
  code-blocks are in the table. Apart from the bin resolution and the bit-plane-only cut
  points, this finds the same threshold a full search would.
* **RTRD-Opt (`mode = 1`)** is meant for a conventional transform, which delivers
  code-blocks one at a time with the most important (LL) first. Only channel 0 is used.
  After every code-block the threshold is computed again from the table so far.
  * While the next code-block is coded, its channel raises `stall_o` as soon as a newly
    pushed hull point falls below that threshold. Tier-1 may then stop coding the
    code-block and end it with `cb_done`, saving Tier-1 time.
  * The final cut still uses the threshold over all code-blocks. A code-block stopped
    early may lose bit-planes that the final threshold would have kept. The scheme
    accepts this ("good enough" rather than optimal truncation).

`t2_ctrl` sequences a tile: Idle, Init (table clear, 256 clocks), Waiting (channels run
on their own), Threshold, Output, Done.

* In RTRD mode every renewal sends Waiting to Threshold and back.
* When the last code-block is renewed, the final threshold run leads to Output.
* Done holds until the next `start`.

## Interfaces

### Tier-1 channels (`t2_tier2`, `jp2k_t2_coproc`)

The signals are unpacked arrays of `NUM_PAIRS` (3):

| signal | dir | width | meaning |
|---|---|---|---|
| `dis_i`, `dis_valid_i` | in | 32, 1 | running distortion reduction after a bit-plane, strobe |
| `rate_i`, `rate_valid_i` | in | 16, 1 | running byte count after a bit-plane, strobe |
| `cb_done_i` | in | 1 | code-block finished (one clock) |
| `cb_id_i`, `cb_nzb_i` | in | 4, 8 | its number (0..15) and zero bit-plane count, with `cb_done_i` |
| `ready_o` | out | 1 | the channel can take a new point or `cb_done` |
| `stall_o` | out | 1 | RTRD: stop coding this code-block |

`D` and `R` may be strobed in different clocks. A point is taken once both have arrived.
Present a new point or `cb_done` only while `ready_o` is high. Assertions in
`t2_slope_calc` catch an overwrite. At most `MAX_PTS` points per code-block are kept.

### SSRAM write port

`header_info`, `address` and `ram_en` give one write per clock, with no back-pressure (ZBT
SSRAM). There are 16 writes per tile, all in the Output state.

### AHB-Lite slave (`t2_ahb_slave`)

Zero wait states, OKAY responses, word accesses only.

| offset | register | fields |
|---|---|---|
| 0x00 | CTRL | [0] start (write 1, self-clearing), [1] mode, [6:4] cr (reset value 6) |
| 0x04 | STATUS | [0] busy, [1] done, [18:16] Tier-2 state (0 Idle, 1 Init, 2 Waiting, 3 Threshold, 4 Output, 5 Done) |
| 0x08 | THRESH | [8:0] final slope-bin threshold |
| 0x0C | BYTES | bytes admitted by the threshold |

A host sets CTRL, feeds Tier-1 data, polls STATUS.done, and reads the 16 header words
from the SSRAM.

## Timing

All blocks run on one clock with a synchronous active-high reset. The top derives that
reset from `hresetn`.

| step | clocks |
|---|---|
| one hull point, no cancellation (strobe to back in Waiting) | 36 |
| each cancellation | about 35 more (Subtraction, Division, Comparison again) |
| renewing a code-block of n points | n + 2 |
| table clear | 256 |
| threshold scan, from start to done, ending at threshold t | 257 - t (256 if everything fits) |
| truncation, per code-block of n points | n + 2 |
| header word, entering the empty FIFO to its SSRAM write | 1 |

Tier-1 needs far longer than 36 clocks to code a bit-plane of a 32x32 code-block. So a
channel is normally idle before its next point arrives, and one renew unit is enough for
three channels.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_PAIRS` | 3 | slope calculation channels (1 is enough for RTRD-only use) |
| `NUM_CB` | 16 | code-blocks per tile (128x128 tile, 32x32 code-blocks) |
| `MAX_PTS` | 8 | bit-planes (hull points) per code-block |
| `TILE_BYTES` | 16384 | tile size in bytes, the base of the budget |
| `TBL_W` | 24 | width of a slope table entry |

Storage at the defaults:

* slope table: 256 x 24 bits
* point store: 16 x 8 x 28 bits
* per channel: a hull stack of 8 x (32 + 16 + 32 + 4) bits

All of it is register arrays, which synthesis may map to RAM.

## Relation to the original design

This RTL follows these points of the published design:

* the five-unit Tier-2 structure;
* the two modes, and three channels for the QCB transform;
* the three hull cancellation rules;
* the slope table updated per code-block, with a threshold found without iteration;
* cut points only at bit-plane ends;
* the pin widths (Distortion 32, Rate 16, CR 3, Header_Info / Address 32, RAM_EN);
* the SSRAM memory map;
* the AHB-Lite slave role of the coprocessor.

The following are this design's own choices:

* the slope format (integer quotient) and the 256 logarithmic bins;
* the power-of-two coding of `cr`;
* the header bit layout, and its offset 252 inside each record;
* `NCP = 3n - 2`;
* the code-block end, ready and stall signals, and the start/done control;
* the bit-serial divider and the stack-based hull;
* fixed-priority service of channels;
* the FIFO depth;
* the AHB register map;
* a Threshold state, which is not among the original states. The Subtraction, Division
  and Comparison states run inside each channel rather than in the central state machine.

Not covered:

* Data formation writes only the header words. It does not copy or reorder the coded
  bytes into a packed code-stream, which the original design also lists among its
  outputs. The entropy coder gives every pass its own 256-byte slot, and Tier-2 sees rates
  only at bit-plane ends. Packing the slots would need the byte count of each pass, and
  would need a read path from the SSRAM, which the interface does not have. Software that
  knows the pass lengths can use CDL and NCP from the header to collect the kept bytes.
* The wavelet transform, the Tier-1 bit-plane and arithmetic coders, the CPU, the bus
  fabric and the SSRAM are outside this RTL.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/t2_ref_pkg.sv` is an independent reference model
that the larger testbenches use. It has:

* its own bin function (from floor(log2));
* a hull rebuilt by a plain loop;
* a threshold found by trying every threshold from 256 down;
* a generator of bit-plane data with the irregular cases (no gain, free gain, steeper
  than before).

| testbench | what it checks |
|---|---|
| `tb_t2_slope_calc` | hull contents against the model, stall rule, 36-clock point latency |
| `tb_t2_renew_table` | full table and point store after each round, 257-clock clear, n+2 renew time, one ack per hull with three channels competing |
| `tb_t2_threshold_gen` | threshold, bytes and scan time against an exhaustive search, for all `cr` |
| `tb_t2_rd_opt` | every header word against a direct computation, with and without back-pressure; n+2 per code-block |
| `tb_t2_data_formation` | order, addresses and timing of the SSRAM writes |
| `tb_t2_ctrl` | legal state order and unit start counts per mode |
| `tb_t2_pkg` | slope-bin function against a reference over edge values and random slopes, pass-count rule |
| `tb_t2_ahb_slave` | register writes and reads, start pulse, ignored IDLE or unselected transfers |
| `tb_t2_tier2` | the whole Tier-2, at default size |
| `tb_jp2k_t2_coproc` | the top, at default size, driven over AHB |

The two whole-design testbenches run:

* IPCRD tiles at ratios 1, 16, 32, 64 and 128;
* RTRD tiles at ratios 32 and 64, with intermediate thresholds checked after every
  code-block;
* an IPCRD tile after the mode switch.

They compare all 16 header words, the threshold and the byte total with the reference
model. They also count each mechanism and fail if one never happens: dropped points,
infinite slopes, merges, stalls, simultaneous channel hand-overs, and thresholds both 0
and above 0. The top-level testbench takes about 30 s to build and under a second to run.

To run one with plain Verilator (the reference package is needed by the larger
testbenches):

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/t2_pkg.sv tb/t2_ref_pkg.sv tb/tb_jp2k_t2_coproc.sv \
        --top-module tb_jp2k_t2_coproc -o sim
    ./obj_dir/sim

The testbenches draw from `$urandom` and initialise everything they read. They do not
depend on X values.
