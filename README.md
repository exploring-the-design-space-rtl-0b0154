# HEVC inverse transform unit (xIT), merged-actor architecture

An HEVC decoder turns each block of dequantised transform coefficients back
into a block of prediction residuals with an integer inverse transform. Blocks
are square, 4x4 to 32x32, and use the inverse DCT approximation of the
standard, except 4x4 intra luma blocks, which use a 4x4 inverse DST. The five
transforms are independent of each other, so hardware can run them in
parallel; the question is how much hardware to spend on that parallelism.

This RTL implements the trade-off point chosen in the design-space study
*Exploring the Design Space of HEVC Inverse Transforms with Dataflow
Programming*: instead of one unit per transform (five units) or one unit for
everything (serial), the 4x4 and 8x8 inverse DCTs share one unit, the 16x16 and
32x32 inverse DCTs share another, and the 4x4 DST has its own. The three units
("actors") work concurrently; inside a merged actor the two sizes are handled
one block at a time on the same datapath.

```
 size  ---> +--------------+ --> xit_dst4    (4x4 DST)        --+
 coef  ---> | xit_splitter | --> xit_it4_8   (4x4 / 8x8 DCT)   --+--> xit_merger --> res
            +--------------+ --> xit_it16_32 (16x16 / 32x32)   --+        ^
                   |                                                      |
                   +-----------> xit_fifo (actor of each block) ----------+
```

## Streams and timing

All streams use valid/ready handshakes: a word moves on a rising clock edge
where both are high. Reset (`rst_n`) is asynchronous and active low.

| port group | width | content |
|---|---|---|
| `size_valid/size_ready/size_in` | 3 | one token per block: `{is_dst, log2(N)-2}` (`xit_pkg::xit_size_t`) |
| `coef_valid/coef_ready/coef_in` | 16 | the block's N*N signed coefficients, raster order: row = vertical frequency, column index fastest |
| `res_valid/res_ready/res/res_last/res_src` | 16 | N*N signed residuals in raster order, `res_last` on the final one, `res_src` = actor that computed it |

Send a size token, then exactly N*N coefficients, then the next token. Blocks
leave in the order they came in, whichever actor computed them.

For a lone block in an idle unit with `res_ready` held high: 3 cycles of
token handling, N*N cycles to load the coefficients, N*N cycles for the
column pass, then one residual per cycle. The last residual appears 2*N*N + 1
cycles after the last coefficient was taken (2049 cycles for 32x32). An actor
accepts its next block's coefficients while the previous block is still
streaming out, so in steady state one actor takes about 2*N*N cycles per block.

## The arithmetic

Each block is transformed in two 1-D passes, exactly as the HEVC standard
specifies it, with 8-bit samples (Main profile):

```
column pass:  g[y][x] = clip16( (sum_k T[k][y] * c[k][x] + 64)   >> 7  )
row pass:     r[y][x] = clip16( (sum_k T[k][x] * g[y][k] + 2048) >> 12 )
```

`g` is held in a 16-bit transpose buffer. The second shift is
`20 - BIT_DEPTH`. The standard leaves the final residual unclipped; here it is
saturated to 16 bits so that the output width is fixed. Conformant bitstreams
never reach that limit.

**Matrices.** `T` for the N-point DCT has 8-bit entries. Every smaller matrix is
part of the 32-point one: row k of the N-point matrix is row `k*32/N` of the
32-point matrix. The 32-point entry (k, n) is an integer approximation of
`64*sqrt(2)*cos((2n+1)k*pi/64)`, so it depends only on the phase
`m = (2n+1)k mod 128`. `xit_pkg::dct_coef` folds m into the first quarter
period (cos(2pi-a) = cos a, cos(pi-a) = -cos a) and looks the magnitude up in
the 33-entry table `COS_MAG` of standard values (90, 90, 90, 89, 88, 87, 85, 83, ...;
64 for the DC row). No 32x32 table is stored. The 4x4 DST matrix (`DST_MAT`)
is listed directly.

Products are 16 x 8 bits. Accumulators are `16 + 8 + log2(N)` bits, 29 bits
for 32x32, and they never overflow.

## Inside an actor: `xit_engine`

All three actors are instances of one engine (`xit_engine`), configured by
`MIN_LOG2N`, `MAX_LOG2N` and `IS_DST`. The wrappers `xit_dst4`, `xit_it4_8` and
`xit_it16_32` fix those parameters.

* **MAC array.** There are `MAXN = 2**MAX_LOG2N` lanes, one per matrix row k.
  Each lane has a 16x8 multiplier, and an adder tree adds the lanes. Together
  they produce one output sample per cycle. The same array serves the column
  pass and then the row pass. Lanes k >= N are masked off for the smaller size.
* **Banked buffers.** The coefficient buffer is MAXN banks, one per coefficient
  row, addressed by column. The column pass therefore reads all of column x in
  one cycle. The transpose buffer is MAXN banks, one per column, addressed by
  row. The row pass therefore reads all of row y in one cycle. Each buffer
  gets at most one write per cycle. Both buffers are plain arrays with no
  reset, and every entry is written before it is read.
* **Control.** A front state machine handles the size, the coefficient load
  and the column pass: `IDLE -> LOAD -> PASS1 -> IDLE`. A back process runs
  the row pass whenever the transpose buffer is marked full. It fills a
  one-word output register that respects `out_ready`. When the column pass
  ends, the coefficient buffer is free, so the next block can load during the
  row pass. If that next block finishes loading before the row pass has
  emptied the transpose buffer, its column pass waits. This is the transpose
  buffer stall.

Cost at the defaults of `xit_top`: the actors have 4, 8 and 32 MAC lanes. The
coefficient and transpose buffers hold 2 x (16 + 64 + 1024) words of 16 bits.

## Splitter, order FIFO and merger

`xit_splitter` takes a size token and works out which actor the block needs.
A 4x4 block with `is_dst` goes to the DST actor. Other 4x4 and 8x8 blocks go
to `xit_it4_8`, and 16x16 and 32x32 blocks go to `xit_it16_32`. `is_dst` is
ignored for blocks larger than 4x4. The splitter then hands `log2(N)` to that
actor and waits while the actor is still busy loading or in its column pass.
It writes the actor number into the order FIFO (`xit_fifo`, `ORDER_DEPTH`
entries). Finally it passes the N*N coefficients through to that actor.

Short blocks can overtake long ones inside the actors. `xit_merger` therefore
pops an actor number from the FIFO and forwards that actor's output until the
residual marked last has gone out. Then it pops the next number. A block that
finishes early waits in its actor, which holds back further row passes there
until it is its turn.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `xit_top` | `BIT_DEPTH` | 8 | sample bit depth; second-stage shift is `20 - BIT_DEPTH` |
| `xit_top` | `ORDER_DEPTH` | 4 | blocks that may be between splitter and merger |
| `xit_engine` | `MIN_LOG2N`, `MAX_LOG2N` | 2, 3 | size range of the actor |
| `xit_engine` | `IS_DST` | 0 | use the 4x4 DST matrix |

## How this relates to the published design

* The study describes its actors in a dataflow language and generates HDL
  from them with a tool. It gives the partitioning, the splitter's job and the
  use of a state machine to schedule the two sizes of a merged actor. It does
  not give the inside of any actor. The engine datapath, the buffer banking,
  the load/row-pass overlap, the token format and the handshakes are this
  design's own.
* The standard HEVC matrices, shifts and clipping are used. The properties
  the study lists are met: a 16-bit transpose buffer, 8-bit matrix entries,
  smaller matrices embedded in the larger ones, no cascaded multiplication or
  intermediate rounding, and accumulators narrower than 32 bits.
* The study does not describe an output side. The in-order merger and its
  FIFO were added so that the unit has a single residual stream.
* The study reports latencies in nanoseconds for an unspecified input set, and
  FPGA figures. These cannot be compared with this RTL, so the testbenches
  check the RTL's own cycle counts instead.
* The study also compares other variants: fully parallel, only one pair
  merged, and fully serial. They are not implemented here.

## Simulating

Every testbench checks itself, prints `TB_RESULT checks=N failures=M` and
stops. A watchdog ends a run that hangs. Run from the directory that holds
`rtl/` and `tb/`, for example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/xit_pkg.sv tb/xit_ref_pkg.sv tb/tb_xit_top.sv --top-module tb_xit_top
./obj_dir/Vtb_xit_top
```

| testbench | what it checks |
|---|---|
| `tb_xit_top` | The whole unit at its default parameters. It sends 101 blocks of every kind with random input gaps and output backpressure. It checks every residual, `res_last` and `res_src` in order, and the 32x32 latency. It fails if any mechanism never occurred: each actor and size, size switches inside both merged actors, concurrent actors, loading during a row pass, the transpose stall, splitter waits, merger hold-back, backpressure, and an ignored DST flag. |
| `tb_xit_workload` | One block of each of the five transforms, sent back to back, like a latency comparison between transform units. It checks every residual. It also checks the time to the last residual: 3709 cycles, derived edge by edge in the file's header. Run one at a time, the same blocks would take 4143 cycles. |
| `tb_xit_engine`, `tb_xit_dst4`, `tb_xit_it4_8`, `tb_xit_it16_32` | One actor: mixed sizes, random gaps and backpressure, every residual, the latency `2*N*N + 1`, and load/row-pass overlap. |
| `tb_xit_splitter` | Routing of sizes and coefficients to behavioural actor models, and the order stream. |
| `tb_xit_merger` | In-order joining of out-of-turn blocks under backpressure. |

The reference model `tb/xit_ref_pkg.sv` is separate from the RTL. It takes
each matrix sign from a floating-point cosine and each magnitude from the
folded angle. It then runs the plain double loops of the standard. Test
blocks include a DC-only block with a known answer (coefficient 1024 gives
residual 8 everywhere), sparse small blocks, and dense full-range blocks that
exercise the 16-bit clip.
