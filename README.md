# Uplink massive-MIMO zero-forcing detector

A base station with M antennas receives K single-antenna users at once on
every OFDM subcarrier. For each subcarrier it sees an M-element vector

    y = H s (+ noise)

where H is the M x K channel matrix and s the K user symbols. This RTL
recovers s with a zero-forcing detector,

    s_hat = W_det y,   W_det = (H^H H)^-1 H^H,

in a time-division scheme: the first OFDM symbol of a subframe is a pilot
symbol from which H and W_det are computed and stored, and the following
data symbols are detected with the stored W_det. The default size is K = 4
users, M = 32 antennas, 600 subcarriers, 14 symbols per subframe, at a
target clock of 200 MHz.

The design follows the structure of a published HLS implementation of the
same algorithm (flow control, channel estimation & pre-processing, a
detection-matrix memory, detection), but is written directly as RTL with its
own micro-architecture, number formats and handshakes. Where it departs
from that reference, and where it is slower or faster, is listed at the end.

## Data flow

```
            in_y (M samples, subcarrier order)
                 |
           +-------------+   pilot symbol    +--------------+   +---------------------+
           | flow_control|--> stream_fifo -->| chest_preproc|-->| wdet_mem            |
           |             |                   |  chan_est    |   | NSUB words, one     |
           |             |                   |  gram        |   | W_det row per word  |
           |             |                   |  cholinv     |   +---------------------+
           |             |                   |  wdet_mult   |        | read   ^ write snoop
           |             |   data symbols    +--------------+        v        |
           |             |--> stream_fifo ----------------------> detection ---+--> out_s (K symbols)
           +-------------+
```

Everything is in one clock domain with an active-low asynchronous reset.
Every block-to-block link is a valid/ready handshake; the two-entry
`stream_fifo`s decouple the flow controller from the two processing paths.

## Pilots and groups of subcarriers

The channel is assumed constant over K neighbouring subcarriers, so
subcarriers `g*K .. g*K+K-1` form group `g` and share one matrix `H_g`
(150 groups at the default size). In the pilot symbol, subcarrier `g*K+u`
carries only user `u`'s pilot `p_u`, so its received vector is column `u` of
`H_g` times `p_u`. With `|p_u| = 1`, the column is recovered as

    h^u = y * conj(p_u)

(`chan_est`, M complex multipliers, combinational). Pilots are inputs of the
top (`pilot[K]`), so any unit-magnitude sequence can be used. Pilot vectors
must arrive in subcarrier order; an assertion in `chest_preproc` checks the
user order within a group.

In a data symbol every user transmits on every subcarrier and subcarrier
`sc` is detected with the W_det of group `sc / K`.

## Number formats

All arithmetic is complex two's-complement fixed point (`mimo_pkg`):

| type      | used for                               | bits per part | fraction bits |
|-----------|----------------------------------------|---------------|---------------|
| `cdata_t` | antenna samples, channel estimates, detected symbols | 16 | 12 (range +-8) |
| `cgram_t` | Gram matrix G, Cholesky factor L       | 32            | 16            |
| `cinv_t`  | 1/L[j][j], L^-1, G^-1                  | 32            | 24            |
| `cw_t`    | W_det as stored                        | 24            | 20            |

Products are formed at full width (`cmul`, 64-bit accumulators) and brought
back to the next format by an arithmetic right shift with saturation
(`shr_sat`). With channel entries of magnitude up to about 0.7 and M = 32,
G fits easily in 32 bits; the W_det format limits the entries of W_det to
+-8, which holds for channels that are not close to singular. A channel
whose Gram matrix is not positive definite in this precision raises the
sticky `npd` output (the inversion then clamps the pivot and finishes).

## Channel estimation and pre-processing (`chest_preproc`)

This is the hard part of the design. Per group it runs three sequential
units on a buffered H:

1. **`gram`** forms G = H^H H. One lower-triangle entry per clock, each as a
   sum of M products (`conj(h^i[m]) * h^j[m]`) in an adder tree; the upper
   triangle is written by conjugate symmetry in the same clock. Conjugation
   and transposition of H are never materialised: they are just the choice
   of operands. K(K+1)/2 clocks.
2. **`cholinv`** inverts G through its Cholesky factor, G = L L^H,
   G^-1 = L^-H L^-1. It is a small sequential machine around one complex
   multiply-accumulate, an iterative square root (`isqrt`) and an iterative
   restoring divider (`udiv`):
   - factor column by column: `L[j][j] = sqrt(G[j][j] - sum |L[j][k]|^2)`,
     `r[j] = 1/L[j][j]`, `L[i][j] = (G[i][j] - sum L[i][k] conj(L[j][k])) r[j]`;
   - invert the triangle: `L^-1[j][j] = r[j]`,
     `L^-1[i][j] = -r[i] sum_{k=j}^{i-1} L[i][k] L^-1[k][j]`;
   - multiply: `G^-1[i][j] = sum_{k>=i} conj(L^-1[k][i]) L^-1[k][j]`, the
     upper triangle by symmetry.

   The square root and the divider each resolve four bits per clock. For
   K = 4 the inversion takes 185 clocks: 36 in the four square roots
   (9 clocks each), 52 in the four divisions (13 clocks each), the rest in
   the multiply-accumulate passes.
3. **`wdet_mult`** forms W_det = G^-1 H^H one row per K clocks, with M
   parallel complex multiply-accumulates (`G^-1[i][k] * conj(H[m][k])`),
   and writes each row to the memory as soon as it is complete.

The channel columns are stored in a **two-bank (ping-pong) buffer**: while
one group is in pre-processing, the next group's pilot vectors are
estimated into the other bank. Only when both banks are full does the block
drop `in_ready`, and the stall propagates back to the input. For K = 4 a
group's rows are all written 211 clocks after its last pilot vector was
taken (11 Gram, 185 inversion, 17 W_det, plus hand-over clocks); in steady
state one group leaves every 214 clocks.

## Detection-matrix memory (`wdet_mem`)

A simple dual-port RAM of NSUB words; each word is one row of a W_det (M
complex `cw_t` entries, 1536 bits at M = 32), and group g occupies words
`g*K .. g*K+K-1`. Storing the whole row in one word lets the detector read
a full row per clock. The read is registered (one clock); a read of the
address being written returns the old word. The write port belongs to
pre-processing, the read port to detection.

## Detection (`detection`)

For a data vector of group g the detector needs the K rows of W_det_g. It
keeps the last matrix it read in a register cache: a vector of the cached
group starts computing at once; a vector of another group first fetches the
K rows, one per clock (K+1 clocks with the read latency). The cache tag is
invalidated when the memory is written at an address of the cached group,
so a new pilot symbol can never leave a stale matrix in use.

The K outputs are computed one per clock, each as the dot product of one
row with y (M complex multipliers and an adder tree), and leave together
with the subcarrier index on a valid/ready port. A new vector is taken in
the last compute clock of the previous one, so the rate is one vector per K
clocks plus one fetch per group.

## Flow control and the symbol-type switch (`flow_control`)

The flow controller counts subcarriers and symbols; symbol 0 of every
subframe is routed to the pilot path, the others to the data path, each
vector tagged with its subcarrier index. It takes one vector per clock when
the chosen path has room.

At a switch of symbol type, the first vector of the new symbol is held
until the other path has drained completely:

- pilot -> data: the pilot path (its FIFO and `chest_preproc`) must be idle,
  so that every W_det of the subframe is in memory before any data vector is
  detected;
- data -> pilot: the data path must be idle, so that no data vector is
  still waiting for a matrix that the new pilot symbol is about to rewrite.

`ev_switch_hold` is high in every clock a vector is held for this reason.
The top also brings out `ev_grp_done` (a group's W_det written),
`ev_reload` (detection fetched a matrix) and `is_pilot_sym` for monitoring.

## Timing and throughput

At 200 MHz and the default size:

| quantity | this RTL | reference HLS design |
|---|---|---|
| pilot vector, not the K-th of a group | taken in 1 clock (5 ns) while a buffer bank is free | 30 ns |
| K-th pilot vector to W_det written | 211 clocks (1.06 us) | 455 ns |
| pilot throughput, steady state | 4 vectors / 214 clocks = 3.74 MS/s | 7.34 MS/s |
| data vector, matrix cached | K+1 = 5 clocks (25 ns) | 30 ns |
| data vector with matrix fetch | 2K+2 = 10 clocks (50 ns) | 45 ns |
| data throughput | 5.25 clocks / vector = 38.1 MS/s | 29.6 MS/s |

With 600 subcarriers and 16.7 us symbols, a detector must keep up with
36 MS/s. The data path does. The pilot path does not: a full pilot symbol
takes 150 x 214 = 32,100 clocks (160 us) to turn into W_det, far more than
the one-symbol latency budget of 16.7 us. The input is stalled while it
runs, so nothing is lost, but the upstream demodulator must be able to wait
(the reference design misses this budget too, by less). The inversion is
the bottleneck; see below.

## Where this design departs from the reference

- **Micro-architecture.** The reference is generated from C++ by an HLS
  tool with library matrix multiply and Cholesky-inverse functions, loop
  pipelining/unrolling and memory reshaping. Here every unit is hand-written:
  the Gram and W_det units are parallel over the antennas, the inversion is
  a serial machine with one multiplier, one square-root and one divider.
  This makes pilot processing about 2x slower than the reference while data
  detection is a little faster.
- **Memory organisation.** The reference widens the memory word so a whole
  row is accessed at once; this design does the same (one W_det row per
  word). The register cache in the detector is this design's own way of
  reading the memory once per group.
- **Number formats** are this design's own (table above); the reference
  leaves them to its fixed-point library.
- **Symbols per subframe.** The reference does not fix the number of data
  symbols; `N_SYM = 14` (one pilot, 13 data) is a choice, as is the pilot
  symbol being the first one.
- **Flow control.** The drain-before-switch rule, the FIFOs (depth 2) and
  the valid/ready handshakes are this design's; the reference only routes
  by symbol type.
- **Not included:** the OFDM demodulator (FFT) in front, the RF front end,
  and downlink precoding with the transpose of W_det. The top's `in_*` port
  is where the demodulator connects.
- **Noise.** As in the reference's test set-up, the testbenches use a
  noiseless channel; zero-forcing itself needs no noise estimate.

## Modules

| file | what it is |
|---|---|
| `rtl/mimo_pkg.sv` | sizes, number formats, `cmul`, `shr_sat` |
| `rtl/mimo_uplink_top.sv` | top level, wires the blocks above |
| `rtl/flow_control.sv` | symbol counting, routing, switch hold |
| `rtl/stream_fifo.sv` | small valid/ready FIFO, any payload type |
| `rtl/chest_preproc.sv` | ping-pong H buffer, sequencing of the three units |
| `rtl/chan_est.sv` | `h = y conj(p)` |
| `rtl/gram.sv` | `G = H^H H` |
| `rtl/cholinv.sv` | `G^-1` through Cholesky |
| `rtl/isqrt.sv`, `rtl/udiv.sv` | iterative square root and divider |
| `rtl/wdet_mult.sv` | `W_det = G^-1 H^H` |
| `rtl/wdet_mem.sv` | detection-matrix RAM |
| `rtl/detection.sv` | `s_hat = W_det y` with row cache |

Parameters: `K`, `M`, `NSUB`, `NSYM` on the top (defaults from `mimo_pkg`).
NSUB must be a multiple of K. The formats are package constants; changing
them changes every stage.

## Verification

Each block has a self-checking testbench in `tb/` that compares against a
double-precision reference (`tb/tb_util_pkg.sv`: Gauss-Jordan inverse,
Gram and zero-forcing matrices) and checks cycle counts where the block has
a fixed schedule (Gram, inversion, W_det rows, group time, detection rate).
Two end-to-end testbenches share `tb/tb_uplink_body.svh`:

- `tb_mimo_uplink_top`: K = 4, M = 8, 16 subcarriers, 3 symbols, two
  subframes with new channels, random output back-pressure. It counts
  pilot-path stalls, switch holds, groups written, matrix fetches, cache
  hits and back-pressure, and fails if any of them never happened.
- `tb_mimo_uplink_full`: the top at its default size, one full subframe
  (600 pilot and 7800 data vectors, about 73,000 clocks; around 15 s in
  Verilator). Every detected QPSK symbol is checked to within 0.01.

Both also check the data-symbol output interval (5.25 clocks per vector
for K = 4) and the pilot-path rate of one group per 214 clocks.

Run one with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/mimo_pkg.sv tb/tb_util_pkg.sv tb/tb_mimo_uplink_full.sv \
    --top-module tb_mimo_uplink_full
./obj_dir/Vtb_mimo_uplink_full
```

Each testbench ends with a line `TB_RESULT checks=<n> failures=<n>`.
