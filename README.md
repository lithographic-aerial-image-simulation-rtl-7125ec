# Polygon-based aerial-image accelerator

Optical lithography simulation computes how a mask layout images onto the
wafer. With the coherent-decomposition model the image intensity is

    I(x, y) = sum_k lambda_k * |I_k(x, y)|^2

and each term I_k is a convolution of the mask with an eigen-kernel. When the
mask is made of rectilinear polygons, that convolution collapses to a signed
sum of table look-ups. Every polygon corner contributes one value of psi_k,
the convolution of a quadrant function with the k-th kernel. This table can
be computed in advance:

    I_k(x, y) = sum_n (-1)^n * psi_k(5x - cx_n + c, 5y - cy_n + c)

Here (cx_n, cy_n) are the corners and c is a fixed offset. The image is on a
25 nm grid and the table on a 5 nm grid, which gives the factor 5. No
floating point is needed: psi_k is a 16-bit fixed-point table and the sums
are 32-bit integers.

This RTL is a co-processor that computes I_k for one 1000 nm x 1000 nm image
region (40 x 40 pixels) and one kernel (400 x 400 samples, 2000 nm x 2000 nm).
The host squares, weights and sums the results of all kernels and walks over
the regions of the layout.

The hard part is bandwidth: every pixel needs one table look-up per corner.
The design keeps the whole table in on-chip RAM and splits it over 5 x 5
banks. For any corner, the 25 look-ups of a 5 x 5 block of pixels then fall
in 25 different banks, and each bank has two ports. So 50 pixels are updated
every clock cycle, by 50 adders, in a fully pipelined loop.

## The loop being computed

For one kernel and one region the loop nest is:

    for n in 0 .. 4N-1                       (corners, sign (-1)^n)
      for gx in 0 .. 7                        (5-pixel groups along x)
        for gq in 0 .. 3                      (pairs of 5-pixel groups along y)
          for i, j in 0..4, p in 0..1         (done in parallel: 50 pixels)
            x = 5*gx + i ; y = 5*(2*gq + p) + j
            I_k[x][y] += (-1)^n * K[5x - cx_n + c][5y - cy_n + c]

One (n, gx, gq) iteration is issued per clock. A region therefore takes
`4N * 32` cycles plus 8 cycles of pipeline drain, where N is the number of
rectangles. The corner loop is outside the pixel loops for two reasons. A
fixed corner gives a regular, affine address pattern over the pixels. Also,
a partial-sum word is visited again only 32 cycles later, so the
read-modify-write of the accumulators needs no forwarding.

## Interleaved kernel banks (`kernel_memory`, `kernel_bank`)

The kernel is cut into tiles of 5 x 5 samples, one image pixel's worth of
kernel grid. Tile (tx, ty) is stored in bank (tx mod 5, ty mod 5). The
samples that one iteration needs are exactly 5 samples apart in x and in y,
so they lie in 25 consecutive tiles in each direction. Consecutive tiles are
in different banks, so the 25 reads never collide, wherever the corner is.

Inside a bank, sample (x, y) has the local coordinates

    lx = (x div 25) * 5 + x mod 5        (same for ly)

and word address `lx * 80 + ly`. Each bank is 80 x 80 = 6400 words of 16 bits.
Port A of every bank reads the samples for pixel group (gx, 2gq) and port B
those for (gx, 2gq+1). Port A also writes when the kernel is loaded.

## Address generation and configurations (`addr_gen`)

Take one axis and write `o = c - cx`. Split it by floor division as
`o = 5*B + r` and `B = 5*Bq + Bm`. The pixel at offset i in group gx reads tile
`B + 5*gx + i`. That tile is in bank `(Bm + i) mod 5`. The bank-to-pixel
assignment is therefore a cyclic rotation by Bm, the configuration. The
configuration depends only on the corner, not on the pixel group. Because
rotations in x and y combine, there are 5 x 5 of them. With 2 x 2 banks a, b
(first row) and c, d (second row) the four configurations deliver
(a,b,c,d), (b,a,d,c), (c,d,a,b) and (d,c,b,a) to the four accesses.

Bank k holds the needed sample in tile row `Bq + gx + (k < Bm ? 1 : 0)`, at
local coordinate `row*5 + r`. This is all the address logic: two divisions
by constants per corner, and an add and a compare per bank. A bank whose row
falls outside 0..15 is outside the kernel, which means the corner is out of
the pixel's interaction range. Its valid bit is cleared and the bank returns
zero. `addr_gen` also outputs `sel = (5 - Bm) mod 5` for the multiplexer.

## Ring multiplexer (`ring_mux`)

The 25 bank outputs have to reach the 25 PEs under one of 25 rotations. A
25-input multiplexer per PE would cost a lot of routing. Instead the 25
samples are placed on a 5 x 5 torus of registers. The torus is shifted
sel_x times in x, where each position takes its left neighbour (index i-1),
then sel_y times in y, where each position takes its upper neighbour (index
j-1):

    for m in 0..3: if (sel_x > m) shift_x
    for m in 0..3: if (sel_y > m) shift_y

These 8 conditional steps run two per clock in four pipeline stages. The
multiplexer accepts a new set every cycle and delivers
`dout[i][j] = din[(i - sel_x) mod 5][(j - sel_y) mod 5]` four cycles later.
There are two rings, one for each kernel port.

## PEs and wide partial-sum words (`pe_accum`)

The 40 x 40 partial-sum array is partitioned like the kernel. Pixel (x, y)
lives in partition (x mod 5, y mod 5), so ring position (i, j) always feeds
partition (i, j).

An accumulator needs a read port and a write port, which is all a block RAM
has. To use the kernel's second port anyway, each partial-sum word is 64 bits
wide and holds two pixels: the pixel in group 2gq (low half) and the pixel
in group 2gq+1 (high half). One read and one write per cycle then serve two
adders, the two PEs of the partition. Each partition has 32 such words.

The first corner of a region overwrites the word instead of adding to it, so
no clearing pass is needed. A region with no corners is written as zeros.

## Pipeline timing

| cycle | stage |
|---|---|
| 0 | `compute_ctrl` issues (n, gx, gq); corner buffer read |
| 1 | `addr_gen`: configuration, bank addresses, valid bits |
| 2 | kernel banks read (both ports) |
| 3-6 | ring multiplexers, two shift steps per cycle |
| 6 | PE reads the old partial-sum word |
| 7 | PE adds or subtracts the two samples and writes the word |

A region on a half starts when both of these hold:

- the corners of the region are in that half of the corner buffer;
- the partial sums last computed in that half have been sent out.

The region finishes 8 cycles after its last issue, and both halves then
swap.

## Overlapping transfers with computation (`compute_ctrl`, `transfer_ctrl`, `corner_buffer`)

Two hardware processes run concurrently.

- **Compute** (`compute_ctrl`) runs the loop above on one half of each
  ping-pong buffer.
- **Transfer** (`transfer_ctrl`) does the following, one step at a time:
  - DI2: copies the next region's corners from the SRAM shared with the host
    into the free half of the corner buffer;
  - DO2: copies a finished half of the partial sums out to that SRAM;
  - takes DI2 first when both are possible.

Both buffers have two halves. `compute_ctrl` keeps the four full flags:

- `cb_full[h]` is set by the transfer process when DI2 into half h ends and
  cleared when the compute process finishes half h;
- `ps_full[h]` is set when the compute process finishes half h and cleared
  when DO2 of that half ends.

Both processes walk the halves in the same alternating order.

The host's own transfers sit on either side of these. DI1 writes corners into
the SRAM, and DO1 reads partial sums from it. They meet the accelerator
through two handshakes:

- **Input.** The host puts `in_count` corner words at `in_base` and holds
  `in_valid`. One cycle of `in_ready` means the corners have been copied and
  the SRAM area can be reused.
- **Output.** `out_valid` means 1600 partial sums are at `out_base`: pixel
  (x, y) at `out_base + 40*x + y`, signed 32-bit. The host answers with one
  cycle of `out_ready`. The next DO2 waits for that answer.

At N >= 50 the transfers take less time than the computation (DI2 is at most
800 reads, DO2 is 1600 writes), so regions follow each other with a 1-cycle
gap. At small N a region is bounded by the transfers.

## Interfaces

`litho_accel` ports. All signals are on `clk`, and the reset is synchronous
and active low.

| port | dir | width | meaning |
|---|---|---|---|
| `kload_we`, `kload_x`, `kload_y`, `kload_data` | in | 1, 9, 9, 16 | write kernel sample (x, y); only while `busy` is low |
| `in_valid`, `in_count`, `in_base`, `in_ready` | in/in/in/out | 1, 10, 20, 1 | region input handshake |
| `out_valid`, `out_ready`, `out_base` | out/in/in | 1, 1, 20 | region output handshake |
| `sram_req`, `sram_we`, `sram_addr`, `sram_wdata` | out | 1, 1, 20, 32 | SRAM request, held until `sram_gnt` |
| `sram_gnt`, `sram_rvalid`, `sram_rdata` | in | 1, 1, 32 | grant; read data in request order, any latency |
| `busy`, `wait_input`, `wait_output`, `region_done` | out | 1 each | compute-process status |

A corner word is `{x[15:0], y[15:0]}`: signed coordinates in 5 nm units,
relative to pixel (0, 0) of the region. The host orders each polygon's
corners so that corner n carries the sign (-1)^n. For a rectangle the order
is (x1,y1) +, (x2,y1) -, (x2,y2) +, (x1,y2) -.

## Parameters and sizes

| parameter | default | meaning |
|---|---|---|
| `P` | 5 | banks per axis (5 x 5 partitioning) |
| `GRID` | 5 | kernel samples per image pixel |
| `KDIM` | 400 | kernel samples per axis (must be a multiple of `P*GRID`) |
| `IMG` | 40 | image pixels per axis (`IMG/P` must be even and at least 2) |
| `MAXC` | 800 | corners per region (200 rectangles) |
| `KOFF` | 200 | table index of offset 0 (the constant c) |

At the defaults the memories are:

| memory | size | bits |
|---|---|---|
| kernel | 25 x 6400 x 16 bit | 2,560,000 |
| partial sums | 25 x 2 x 32 x 64 bit | 102,400 |
| corners | 2 x 800 x 32 bit | 51,200 |

That is about 2.71 Mbit of on-chip RAM. The original implementation reported
2.97 Mbit and about 20K ALUTs at 100 MHz on a Stratix II EP2S180. The
difference is in the platform's buffering and interface logic, which is not
part of this RTL.

## Performance against reported figures

At 100 MHz, one region costs `4N*32 + 8` cycles. A 200 um x 200 um layout has
40,000 regions. For one kernel this projects to the times below; the
originally reported accelerator times are for comparison.

| N | projected | reported |
|---|---|---|
| 50 | 2.56 s | 2.61 s |
| 100 | 5.12 s | 5.16 s |
| 200 | 10.24 s | 10.27 s |

Time grows linearly with the number of kernels. The host loads a kernel once
(160,000 samples) and runs all regions with it before loading the next. The
pixel rate is 25.0 Mpixel/s at N = 50 and 12.5 Mpixel/s at N = 100.

## Where this RTL makes its own choices

The accelerator was originally generated from C by high-level synthesis. The
partitioning, ring multiplexing, wide words, pipelining and ping-pong overlap
here follow that design. The following are choices of this RTL:

- **Kernel range.** A look-up outside the 400 x 400 table contributes zero.
  That is, corners out of a pixel's interaction range are ignored. The host
  must pad regions so that this is the intended physics.
- **Host interface.** The handshakes, the SRAM request/grant protocol, the
  output word order and the direct kernel load port are new. The original
  platform used vendor HyperTransport and SRAM interface cores, which are not
  modelled.
- **Partial-sum clearing.** The first corner overwrites the partial sums
  instead of a separate clearing loop.
- **Geometry conventions.** The ring direction convention, the pairing of
  the two pixel groups in a wide word, and the corner word layout are chosen
  here.
- **Off-grid corners.** Corners must lie on the 5 nm grid. Interpolation for
  finer corner grids is not implemented.
- **Overflow.** Partial sums wrap at 32 bits. With 16-bit samples and at
  most 800 corners they cannot overflow.
- **Not built.** Squaring and weighting of I_k, the kernel loop, and region
  tiling are host software. The naive geometric 4-way partitioning, which the
  interleaved scheme replaced, is not built.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=<n> failures=<m>`.

| testbench | what it checks |
|---|---|
| `tb_litho_accel` | End to end at the default size: 7 regions (0 to 800 corners, many out of range), random SRAM back-pressure, a slow host. It checks all 11,200 partial sums against a direct evaluation of the formula and the compute cycles of every region. It also requires each of these to happen at least once: DI2 and DO2 overlapping computation, both kinds of waiting, back-pressure, out-of-range look-ups, the first-corner overwrite and the empty-region clear, negative corners, and all 5 shift amounts in x and y. |
| `tb_litho_accel_2x2` | The same end-to-end checks with `P = 2` (60 x 60 kernel, 8 x 8 region). It also requires all four bank configurations to occur. |
| `tb_workloads` | Regions of N = 5 ... 200 back to back, then a second kernel. It checks the sums, the 4N*32+8 compute time, that transfers are hidden at N >= 50, and the projected times against the table above (within 5 %). |
| `tb_addr_gen` | Bank, local address and valid bit of all 50 accesses against plain floor arithmetic, and that sel routes every access to its pixel. |
| `tb_ring_mux` | The rotation formula for random sets entered every cycle, the 4-cycle latency, and all shift amounts. |
| `tb_kernel_memory` | The interleaving rule and zero on invalid, on a 2 x 2-bank, 40 x 40 kernel. |
| `tb_kernel_bank`, `tb_corner_buffer`, `tb_pe_accum`, `tb_compute_ctrl`, `tb_transfer_ctrl` | Storage, ping-pong halves, accumulate modes, loop order and flags, DI2/DO2 against an SRAM model. |

`tb/sram_model.sv` is a behavioural SRAM with a fixed read latency and random
grant. It is used only by the testbenches.

To simulate with Verilator, run from the directory that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/litho_pkg.sv tb/tb_litho_accel.sv --top-module tb_litho_accel
    ./obj_dir/Vtb_litho_accel

Replace `tb_litho_accel` with any other testbench name. The full-size
end-to-end run takes about a second, most of it loading the kernel.

## Files

- `rtl/litho_pkg.sv`: default sizes, the corner word type, accumulate modes
- `rtl/litho_accel.sv`: top level
- `rtl/compute_ctrl.sv`, `rtl/transfer_ctrl.sv`: the two processes
- `rtl/corner_buffer.sv`: ping-pong corner storage
- `rtl/kernel_memory.sv`, `rtl/kernel_bank.sv`: interleaved kernel RAM
- `rtl/addr_gen.sv`: configuration and bank addresses
- `rtl/ring_mux.sv`: 2D ring multiplexer
- `rtl/pe_accum.sv`: partial-sum partition with its two PEs
