# Polymorphic Register File: a conflict-free 2D parallel memory

A vector or dataflow kernel that works on matrices needs many elements per
clock cycle. It also needs them in more than one shape: a row for a
horizontal filter, a column for a vertical one, a square tile, or a
diagonal. A Polymorphic Register File (PRF) is a register file holding one
large `N x M` matrix of elements. Software carves logical registers of any
position and shape out of that matrix.

This repository contains the storage core of such a register file. The
matrix is spread over `p x q` independent memory modules. Every access moves
one *block* of `p*q` elements, one per vector lane, in a single cycle. That
only works if the elements of the block all sit in different modules. The
*memory scheme* is the rule that places elements in modules so that the
block shapes you care about are conflict-free.

There are two designs here:

* **`prf_top`**: the general PRF parallel memory. By default it is 128 x 128
  elements of 64 bits (128 KB) in 2 x 4 modules, giving 8 lanes. It has two
  read ports and one write port, and a memory scheme selectable at run time.
* **`prf_wavg_accel`**: a tiny accelerator showing how a PRF can be tailored
  to one kernel. It computes a weighted average of three vertically adjacent
  pixels over a streamed 64 x 64 image. It uses a 129-entry stream register
  and a 3-entry coefficient register, each with a 96-bit parallel read port.

`prf_system` places the two side by side. They share only the clock and
reset.

## Memory schemes and block shapes

An element `(i, j)` (row `i`, column `j`) lives in module `(v, h)`, with
`v` in `0..p-1` and `h` in `0..q-1`. The Module Assignment Function (MAF)
gives that module. Below, `/` is floor division.

| scheme | `v` | `h` | conflict-free shapes |
|---|---|---|---|
| ReO (rectangle only) | `i mod p` | `j mod q` | p x q rectangle |
| ReRo (rectangle, row) | `(i + j/q) mod p` | `j mod q` | rectangle, 1 x pq row, main diagonal if gcd(p, q+1)=1, secondary diagonal if gcd(p, q-1)=1 |
| ReCo (rectangle, column) | `i mod p` | `(i/p + j) mod q` | rectangle, pq x 1 column, main diagonal if gcd(p+1, q)=1, secondary diagonal if gcd(p-1, q)=1 |
| RoCo (row, column) | `(i + j/q) mod p` | `(i/p + j) mod q` | row, column, rectangle aligned with `i mod p = 0` or `j mod q = 0` |
| ReTr (rectangle, transposed) | p<=q: `i mod p`; p>q: `(i + j - j mod q) mod p` | p<=q: `(i - i mod p + j) mod q`; p>q: `j mod q` | rectangle, q x p transposed rectangle (when p divides q or q divides p) |

A block is named by its upper-left element `(i, j)` and its access type:

* `ACC_RECT`: a p x q rectangle.
* `ACC_ROW`: a 1 x pq row.
* `ACC_COL`: a pq x 1 column.
* `ACC_MDIAG`: a main diagonal, `(i+k, j+k)`.
* `ACC_SDIAG`: a secondary diagonal, `(i+k, j-k)`.
* `ACC_TRECT`: a q x p transposed rectangle.

The Address Generation Unit (`prf_agu`) lists the `p*q` element
coordinates of a block. Lane `n` gets one element:

* rectangles: row-major order;
* rows, columns and diagonals: offset `k = n`.

Coordinates wrap modulo `N` and `M`, so a block may cross the matrix edge.

RoCo is the scheme used for the 128 KB reference configuration. Rows and
columns are both conflict-free at any position, so writing a block as rows
and reading it back as columns transposes it at full bandwidth.

The scheme is an input (`memory_scheme`). It can change between operations,
but data written under one scheme must be read under the same scheme. The
placement depends on it.

## Standard and customized addressing

Each module holds `N*M/(p*q)` words, 2048 words by default. All element
`(x, y)` needs beyond its module is an address inside that module. Every
scheme uses the same one, because each p x q tile of the matrix holds exactly
one element per module:

    A(x, y) = (x / p) * (M / q) + (y / q)

That is the *tile index* of the element. The design computes this address in
two different ways.

### Standard addressing (read ports)

The standard path works lane by lane. The AGU gives every lane its element
`(x, y)`. A MAF and a standard addressing function (`prf_std_addr`) per lane
produce the module number and the address. Lane `n` knows which module it
needs, but module `m` needs to know which address to use. So an *address
shuffle* scatters each lane's address to the module that lane selected. The
shuffle is a full crossbar (`prf_shuffle`, SCATTER mode).

The memories answer one cycle later. The module selects are therefore
registered. One cycle later they steer the *read data shuffle*, a gather
crossbar that puts the module outputs back in lane order.

### Customized addressing (write port)

The customized path removes the address shuffle. Each module works out
by itself which element of the block it holds. It uses only three
things: the block origin `(i, j)`, the access type, and its own fixed
position `(k, l)`.

Each module's `prf_cust_coef` instance computes two small signed tile
offsets:

    c_i = x/p - i/p        c_j = y/q - j/q

Here `(x, y)` is the element of the block that the scheme assigns to module
`(k, l)`. Its `prf_cust_addr` instance then forms

    A = ((i/p + c_i) mod N/p) * (M/q) + ((j/q + c_j) mod M/q)

This equals `A(x, y)`, but no lane ever has to deliver `(x, y)` to the
module. Because `(k, l)` is a parameter of each instance, most of the
arithmetic folds into constants.

The coefficients come from solving the MAF equations for the unknown lane
offset. The notation is `i0 = i mod p`, `ib = i/p`, `j0 = j mod q`,
`jb = j/q`.

* **Rectangle under ReO.** The offsets `(x - i)` and `(y - j)` follow
  directly from `k` and `l`: `(k - i0) mod p` and `(l - j0) mod q`. Each
  coefficient is the carry that offset produces into the next tile: `c_i = 1`
  if `i0 + (k - i0) mod p >= p`, else 0, and likewise for `c_j`.
* **1D accesses (rows, columns).** One coordinate is pinned by the module
  position. Take a ReRo row: `h = y mod q` fixes `y - j = a0 + q*t`, where
  `a0 = (l - j0) mod q`. The other MAF equation, `v = (i + y/q) mod p`,
  then gives `t = (k - i - jb - carry) mod p`. Then `c_j = carry + t` and
  `c_i = 0`.
* **Diagonals.** Both coordinates move with the lane offset `λ`. The
  remaining equation takes the form `(q+1)·t ≡ r (mod p)`, or the same with
  `q-1`, `p+1` or `p-1`. It is solved by multiplying by the modular inverse
  `ω` of that factor, `t = ω·r`. These ω constants exist exactly when the
  gcd condition of the table above holds. The design computes them at
  elaboration from `P` and `Q` (`prf_pkg::modinv`) instead of storing a
  table. For `p = 2, q = 4`, the four ω values are 1, 1, 3 and 1.
* **RoCo rectangle.** Only aligned rectangles are conflict-free. The module
  uses the alignment case it is in (`i0 = 0` or `j0 = 0`), which makes one
  coefficient zero.
* **ReTr transposed rectangle.** The skew of the second MAF coordinate is a
  multiple of `p` (or `q`). The offset splits into a whole number of tiles
  plus a remainder.

A worked example: ReRo, a row starting at `(3, 5)`, `p = 2`, `q = 4`.

* **Module (0, 2).** `a0 = (2 - 1) mod 4 = 1`, with no carry. Then
  `t = (0 - 3 - 1 - 0) mod 2 = 0`. So `c_j = 0`, the module holds
  `(3, 6)`, and its address is `1*32 + 1 = 33`.
* **Module (1, 0).** `a0 = 3`, which carries. Then `t = 0`, so `c_j = 1`.
  The module holds `(3, 8)`, and its address is `34`.

Both results equal the standard addresses of those elements.

In `prf_cust_coef`, an unsupported (scheme, access) pair gives meaningless
coefficients. Both ports assert that every request is conflict-free.

The write port also needs a *write data shuffle* (scatter crossbar) to route
each lane's word to its module. The read side keeps standard addressing
and the write side uses customized addressing. Together they cover both
forms, so each can be compared with the other in simulation.
`tb_prf_cust_coef` checks the coefficients exhaustively against the MAF for
2 x 4, 4 x 2 and 4 x 8 module arrays.

## Ports and timing of `prf_top`

Parameters: `N = 128`, `M = 128` (powers of two), `P = 2`, `Q = 4`,
`W = 64` (`sram_width`), `NRD = 2` read ports, and `MACRO_DEPTH = 256`.
`N/P` and `M/Q` must be powers of two.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `memory_scheme` | in | `scheme_e` (3) | ReO/ReRo/ReCo/RoCo/ReTr |
| `wr_en` | in | 1 | write request |
| `wr_i`, `wr_j` | in | log2 N, log2 M | upper-left coordinate of the written block |
| `wr_access` | in | `access_e` (3) | shape of the written block |
| `prf_data_in[P*Q]` | in | W each | one word per lane |
| `rd_en[NRD]` | in | 1 each | read request per port |
| `rd_i[NRD]`, `rd_j[NRD]`, `rd_access[NRD]` | in | as for writes | block per read port |
| `prf_data_out[NRD][P*Q]` | out | W each | read data, lane order |
| `rd_valid[NRD]` | out | 1 each | read data valid |

Timing:

* A write is stored at the clock edge that samples `wr_en`.
* A read sampled at edge `t` appears on `prf_data_out` and `rd_valid` after
  edge `t+1`, a latency of one cycle.
* When a read and a write to the same element happen in the same cycle, the
  read returns the old data.
* All three ports run every cycle with no back-pressure.
* Reset clears only the valid flags. The storage is not initialised.

## Memory modules

Each of the `p*q` modules (`prf_mem_module`) holds 2048 x 64 bits. It is
built from 256 x 64-bit dual-port macros (`prf_sram`, one write and one read
port, synchronous read). The high address bits pick one of 8 macros.

For two read ports, the whole bank of macros is duplicated. Every write goes
to both copies, and copy `r` serves read port `r`. The default build
therefore has 8 x 8 x 2 = 128 macros of 256 x 64 bits. `prf_sram` is a plain
memory array, so a synthesis flow can map it onto a real macro.

## The weighted-average accelerator

The example kernel computes, for each pixel of a 64 x 64 image,

    out = K[0]*in[pos-64] + K[1]*in[pos] + K[2]*in[pos+64]

with `K = {3, -1, 3}`. That is the pixel above, the pixel itself and the
pixel below.

The accelerator has three parts:

* **`prf_stream_reg`** keeps the last 129 (`2*64 + 1`) streamed pixels in a
  shift register. Its read port returns the three taps packed in one 96-bit
  word.
* **`prf_static_reg`** holds `K`, loaded at reset. It also has a write port
  so the host can change the coefficients.
* **`prf_wavg_kernel`** reads both 96-bit words in one cycle, unpacks them
  with bit selects and forms the sum. The output is registered.

Pixels enter one per cycle with `pix_valid`. Once 129 have arrived, every
new pixel produces one output a cycle later. Output `n` belongs to pixel
`n + 64` in raster order, which gives 3968 outputs per image. There is no
special handling of the image borders. The arithmetic is signed 32-bit and
wraps like C `int`.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
module against an independent reference (`tb_prf_ref_pkg`) and prints
`TB_RESULT checks=<n> failures=<n>`. Highlights:

* **`tb_prf_top`** runs all five schemes at full size. Each starts with a
  full-matrix fill, then random conflict-free traffic runs on all three
  ports. A reference matrix predicts every read. The test requires every
  conflict-free (scheme, access) pair on both kinds of port, simultaneous
  reads, read-during-write, edge wrap-around and a scheme switch.
* **`tb_prf_system`** runs both designs at their default sizes, with no
  parameter overrides. It transposes the full matrix under RoCo (row writes,
  column reads on both ports), switches to ReRo and checks diagonals, and
  streams one image through the accelerator.
* **`tb_prf_lanes`** repeats that random test for the wider 128 KB
  configurations: 16 lanes (2 x 8), 32 lanes (4 x 8) and 64 lanes (4 x 16).
* **`tb_prf_conv`** runs one 32 x 32 block of a separable 2D convolution for
  3 x 3, 9 x 9 and 33 x 33 masks in the PRF. The multiply-accumulate lanes
  are modelled in the testbench. It checks the result and the cycle counts
  of the data movement: 128 cycles to load, 128 to store and `32*R/8` (+1)
  to move the halo, for 8 lanes.

To run one with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/prf_pkg.sv tb/tb_prf_ref_pkg.sv tb/tb_prf_system.sv \
        --top-module tb_prf_system
    ./obj_dir/Vtb_prf_system

Replace `tb_prf_system` with any other testbench name. The unit testbenches
that do not use the reference package also build without
`tb/tb_prf_ref_pkg.sv`. Every testbench has a cycle watchdog.

To change the geometry, override `P`, `Q`, `N`, `M` or `W` on `prf_top`. All
equations are parametric. Diagonals under ReRo/ReCo need the gcd conditions
above. The whole memory is tested at 2 x 4, 2 x 8, 4 x 8 and 4 x 16. The
coefficients alone are also tested at 4 x 2, which exercises the `p > q` form
of ReTr.

## Departures and limits

* **Logical registers and the kernel are not included.** These are the
  special-purpose registers that define logical registers (base, shape,
  size, type), the dependency logic around them, the compute kernel that
  uses the PRF, the local store and the host interconnect. `prf_top` is
  the parallel memory alone. The convolution kernel appears only as a
  testbench model.
* **Derived equations.** The MAF equations are the standard ones of these
  parallel memory schemes. The customized addressing coefficients are
  derived here in closed form, as sketched above. The ω constants are
  computed from `P` and `Q` instead of stored. The values for
  `p ∈ {2, 4}` and `q ∈ {2, 4, 8}` are checked against a hand-written table.
* **Design choices.**
  * The lane order within a block.
  * Wrap-around of coordinates at the matrix edge.
  * The enable-only handshake and the reset behaviour.
  * The enum encodings.
  * Lowest-lane priority in the scatter crossbar. It only matters for
    non-conflict-free requests, which the assertions flag.
* **8 lanes by default.** The 16-, 32- and 64-lane configurations (2 x 8,
  4 x 8, 4 x 16) need parameter overrides. They are simulated but not the
  default build.
* **No normalisation in the example kernel.** Its output is the plain
  weighted sum. Any scaling after the sum is left to the consumer.
