# Time-domain DTW engine with time flip-flops

Dynamic time warping (DTW) measures how alike two time series are when one
runs faster or slower than the other. For series A and B it fills a matrix

    D(i,j) = |A_i - B_j| + min( D(i-1,j), D(i,j-1), D(i-1,j-1) )

and the last element is the distance. This engine computes that recurrence
on a 20 x 20 array of unit cells in the **time domain**: every value is the
width of a pulse. Two operations that cost many gates in binary arithmetic
become almost free:

* **minimum**: pulses that start together are all high only until the
  shortest one ends, so `min` is an AND gate;
* **absolute difference**: two pulses A and B wide that start together
  differ (XOR) for exactly |A-B|;
* **addition**: writing two pulses one after the other into a storage
  element that counts pulse width accumulates them.

The storage element is a *time flip-flop* (TFF), a ring that holds a pulse
width and can send it out again later. Because values can be stored, the
array is pipelined: one anti-diagonal of the DTW matrix is computed per
pipeline cycle, series longer than 20 are processed as a stream of 20 x 20
sections, and right-edge results are converted to digital and fed back into
the next section. A second, non-pipelined mode bypasses the TFFs and lets a
single edge race through the array (useful for short sequences such as DNA
strings).

The RTL is a **quantized-time model** of this circuit. All time-domain
signals are ordinary logic levels sampled on one clock, the *time quantum*:
one clock period stands for one LSB of pulse width (40 ps in the
original 65 nm design). A value x is a signal that is high for x clock
cycles. The time-domain blocks (delay chains, rings, Vernier TDCs) become
shift registers and counters that do on quanta what the circuits do on
delays. The whole design is synthesizable and simulates with plain
Verilator.

## Number formats

| quantity | width | notes |
|---|---|---|
| sample A_i, B_j | 4 bit | converted to a pulse by a 4 bit DTC |
| TFF | 6 bit | one ring, counts modulo 64 |
| WTFF (wide TFF) | 10 bit | 6 bit LSB TFF + 4 bit MSB TFF |
| D(i,j), distance | 10 bit | wraps modulo 1024; 1023 is used as "infinite" at the outer boundary |
| pulse offset M | 2 quanta | added by the minimum-pulse generator, removed again on store/decode |
| trim | 2 bit per cell | lengthens the cell's output pulse by 0..3 quanta |

## Time flip-flops (`tff`, `wtff`)

A `tff` counts the quanta in which its `wr` input is high. When it wraps
from 63 to 0 it raises `carry`. On `rd_start` the count moves to an output
counter and the ring is empty again, so it can take the next write during
the same phase. From the next quantum `out` is high until the output counter
runs out. A `rot` request adds one more full turn of the ring (64 quanta) to
the output with no gap.

A `wtff` joins two TFFs into 10 bits:

* **Write:** each LSB carry fires a one-quantum pulse generator. Its pulse
  is written into the MSB TFF. The first M quanta of every write phase are
  dropped. This removes the offset that the minimum-pulse generator added
  upstream, so writing a pulse of x+M quanta stores x.
* **Readout:** the result is a single pulse MSB*64 + LSB quanta long. The
  LSB ring sends its remainder. While MSB units remain, it asks for one more
  rotation each time it is about to run empty.

A carry from the last write quantum takes two quanta to reach the MSB TFF.
Readout must therefore start at least one idle quantum after a write phase
ends (an assertion in `wtff` checks this).

The **minimum-pulse generator** (`min_pulse_gen`) keeps a value of 0 from
becoming a pulse too narrow to travel. It ORs a fixed M-quantum pulse at the
start of the phase with the input delayed by M quanta. The result is one
contiguous pulse x+M wide that still starts with the phase. The AND-based
minimum therefore still works: min(x+M, y+M) = min(x,y)+M.

## The unit cell (`dtw_cell`)

Each cell contains:

* the **main WTFF**, which holds D(i,j);
* a **copy WTFF**, which holds D(i-1,j-1) for one extra pipeline cycle;
* an **ABS** module (`abs_td`: two DTCs and an XOR, then an offset);
* a **MIN** gate (`min_td`, a 3-input AND);
* a **2 bit tunable delay** (`tune_delay`) on its output.

The copy WTFF is needed because of when the ancestors are computed. Cell
(i,j) is computed in the same pipeline cycle as (i-1,j+1) and (i+1,j-1).
Its upper and left ancestors were computed one cycle earlier. Its diagonal
ancestor was computed two cycles earlier. So in each cycle every cell copies
the pulse its diagonal neighbour sends out, and uses it one cycle later.

The cell also registers its A and B samples. On every pipeline cycle, A
moves one cell to the right and B one cell down.

### The pipeline cycle

One pipeline cycle is a fixed sequence of phases broadcast to all cells in
the `ctl_t` bundle (`dtw_pkg`):

| quanta | control | what happens |
|---|---|---|
| 1 | `step`, `rd_start` | sample registers advance; every WTFF moves its value to its output |
| PH_RD = 1033 | `rd_phase` | every main WTFF sends D+M(+trim); each cell ANDs up, left and its copy → min+M is written into its main WTFF; the diagonal neighbour's pulse is written into the copy WTFF; TDCs measure the edge cells |
| 1 | `ab_start` | TDC codes are valid and captured |
| PH_AB = 19 | `ab_phase` | the ABS pulse \|A-B\|+M is accumulated into the main WTFF |
| 1 | gap | the last carry settles |

That is 1055 quanta per pipeline cycle. PH_RD is long enough for a full
10 bit pulse plus offset and trim. The original chip was measured at 110 MHz
pipeline rate. A full-range 10 bit pulse does not fit in such a cycle, so
this model lets the readout phase span the whole range.

## The matrix and sections (`dtw_matrix`, `dtw_ctrl`)

`dtw_matrix` wires N x N cells. A cell's upper, left and diagonal inputs
are its neighbours' outputs. Along the top row, the left column and the
corner they are boundary pulses from `bnd_src` sources. The right column and
bottom row drive one TDC each (`tdc`). A TDC counts the quanta of a pulse,
removes the offset M and saturates at 1023.

Long series are cut into **sections** of N samples. Section (p,q) is the
N x N block of the full DTW matrix for A[pN..pN+N-1] and B[qN..qN+N-1].
Within a section, cell (i,j) is written in local cycle i+j+1. So a section
takes 2N+1 pipeline cycles, and its right-column value of row k and
bottom-row value of column k leave in local cycle k+N+1.

The sequencer starts a new section, in row-major order, every **N+1**
cycles. Two sections are then in the matrix at once, on different
anti-diagonals. Within one pipeline cycle:

* The right-edge value of row k of the older section is decoded by its TDC.
  In the **next** cycle it is re-sent by the left source of row k. That is
  exactly when the newer section, its right-hand neighbour, needs it.
* The bottom-edge value of column k is written to the register file's
  boundary row. It is read again as the top boundary of the section below.
* The corner of a section is the boundary-row word just left of it. It is
  read before the section to its left overwrites that word.
* Boundaries outside the full matrix are 1023 ("infinite"). The corner
  before the first samples is 0.

Only the newest section ever needs data from the register file, because
each row and column takes its sample and boundary at its own local cycle.
An operation of T = ceil(len_a/N) × ceil(len_b/N) sections takes
(T-1)(N+1) + 2N+1 pipeline cycles, and
from `start` to `done` it takes 1 + that × 1055 quanta.

### Series that do not fill the last section

A series of any length from 1 to N*MAX_TILES is padded up to whole
sections, and the result is still read at the far corner of the last
section. Padding is marked, not stored:

* Every sample entering the matrix carries a **pad flag**. The flag is set
  when the sample's index is at or beyond the series length. A padded
  sample enters with the value 0.
* The flag pair travels with the samples. A padded cell adds no cost: its
  ABS module compares A with itself.
* A cell past the end of A only takes its **upper** input, so it copies
  D(la-1, j) downwards. A cell past the end of B only takes its **left**
  input, so it copies D(i, lb-1) to the right. A cell past both ends
  takes all three inputs, and all three already hold D(la-1, lb-1).
* So the far corner of the last section always holds D(la-1, lb-1), and
  its TDC reads it as usual. This holds whether one series, the other or
  both end inside a section. The bypass mode masks its OR gates the same
  way.

With trims this changes slightly: every padded cell on the path to the
corner adds its trim, as any cell does.

## Bypass (race) mode

With `mode_race = 1` the WTFFs are bypassed. The sequencer spends N quanta
loading the samples, then raises the corner input and holds it for a
1024-quantum window. Each cell ORs its three inputs, which picks the
earliest edge, and delays the result by |A-B| quanta in a tapped delay chain
(a `dtc` instance). The edge reaching the last cell therefore arrives after
exactly the DTW distance. The right TDC of the last row measures that
arrival time.

This mode handles one N x N section; shorter series use the same pad
flags. The mode ignores the trims, and its |A-B| tap select is computed digitally
inside the cell.

## Using the engine (`dtw_engine`)

Ports:

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | time-quantum clock; asynchronous active-low reset |
| `scan_in`, `scan_en`, `scan_upd`, `scan_out` | in/out | scan access to the register file and results |
| `start` | in | one-quantum pulse starts an operation (taken only when idle) |
| `mode_race` | in | 0: pipelined / unfolded, 1: bypass |
| `len_a`, `len_b` | in | series lengths in samples (1..N*MAX_TILES; at most N in bypass mode) |
| `trim[i][j]` | in | 2 bit tunable delay of every cell; all 0 for the exact result |
| `busy`, `done` | out | running; one-quantum strobe at the end |
| `distance` | out | the DTW distance, held until the next operation ends |

The scan word is 2 + AW + 10 bits, `{op, addr, data}`, with AW = 9 at the
defaults. Shift it in MSB first with `scan_en` high, then give one quantum
of `scan_upd`:

| op | action |
|---|---|
| 0 | A[addr] = data[3:0] |
| 1 | B[addr] = data[3:0] |
| 2 | capture `distance` into the data field |
| 3 | capture boundary-row word `addr` into the data field |

After a capture, shift in any next word to push the captured word out on
`scan_out`. Writes are ignored while the engine is busy.

A complete operation:

1. Scan in A and B.
2. Set `len_a`, `len_b` and `mode_race`.
3. Pulse `start`.
4. Wait for `done`.
5. Read `distance`, or scan it out with op 2.

Trims change the result in a predictable way. A cell with trim t presents
D+t to its neighbours and to a TDC, so the engine computes the recurrence
on those shifted values. The calibration that would choose trims for real
silicon is not part of this RTL.

## Parameters (`dtw_engine`)

| parameter | default | meaning |
|---|---|---|
| `N` | 20 | matrix size (20 x 20 as on the chip) |
| `MAX_TILES` | 16 | sections per series held by the register file (320 samples); own choice |
| `PH_RD` | 1033 | readout phase, quanta |
| `PH_AB` | 19 | ABS phase, quanta |
| `RACE_WIN` | 1024 | bypass-mode window, quanta |

The widths in `dtw_pkg` (4 bit samples, 6+4 bit WTFF, 2 bit trim) follow the
original design. The offset M = 2 and all phase lengths are choices of this
implementation.

## How far it follows the original, and where it does not

These follow the published design: the recurrence, the MIN and ABS
principles, the 6 bit ring TFF with carry and rotation, the 10 bit WTFF from
two TFFs and a carry pulse generator, the cell's two WTFFs with the
diagonal copy, the 4 bit DTC, the 2 bit tunable delay, the 20 x 20 diagonal
pipeline, right and bottom TDCs whose results are re-sent into later
sections, the register file, the bypass mode and the scan chain.

This implementation's own choices:

* **Quantized time.** There is no analog behaviour: no leakage in the
  rings, no process variation, no supply dependence.
* **TDC resolution.** The TDCs resolve one LSB. The original TDC resolves
  half an LSB to reduce error at section boundaries.
* **No calibration.** The matrix calibration scheme is not implemented,
  because its procedure is not available. The per-cell trims are inputs of
  the top instead.
* **Own sequencing.** The phase structure, phase lengths, WTFF readout by
  rotation, offset removal, section order and N+1 spacing, boundary
  conventions, register-file size and scan word format are all chosen here.
* **Padding.** How a partial last section is handled is this design's
  own scheme. Series are limited to N*MAX_TILES samples by the register
  file, and to N in bypass mode. Results wrap at 10 bits, the same storage
  limit as the original.
* **One TDC per edge.** Each edge row and column has its own TDC instead of
  a shared converter.

## Files

| file | contents |
|---|---|
| `rtl/dtw_pkg.sv` | widths, constants, `ctl_t` phase bundle |
| `rtl/dtw_engine.sv` | top level |
| `rtl/dtw_ctrl.sv` | clock-management unit / sequencer |
| `rtl/dtw_rf.sv` | register file (series, boundary row) |
| `rtl/scan_chain.sv` | scan access |
| `rtl/dtw_matrix.sv` | N x N array |
| `rtl/dtw_cell.sv` | unit cell |
| `rtl/wtff.sv`, `rtl/tff.sv` | wide and 6 bit time flip-flops |
| `rtl/abs_td.sv`, `rtl/dtc.sv`, `rtl/min_td.sv` | ABS, DTC, MIN |
| `rtl/min_pulse_gen.sv`, `rtl/tune_delay.sv` | offset generator, tunable delay |
| `rtl/bnd_src.sv`, `rtl/tdc.sv` | boundary pulse source, time-to-digital converter |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_dtw_engine_full.sv` | end-to-end test at the default size |
| `tb/tb_ucr_classify.sv`, `tb/tb_dna_bypass.sv` | the two applications, at the default size |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops.
Example:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/dtw_pkg.sv tb/tb_dtw_engine.sv --top-module tb_dtw_engine
    ./obj_dir/Vtb_dtw_engine

What the testbenches cover:

* **Unit testbenches** check each block against values computed
  independently: pulse widths, carries, rotations, offsets, TDC codes,
  register-file slices, scan words, phase counts and the sequencer's
  boundary bookkeeping.
* **`tb_dtw_engine`** uses N = 4 and MAX_TILES = 4. It compares the engine
  with a software DTW, including trims. It covers single and unfolded
  operations up to 4 x 4 sections, lengths that need padding, bypass runs,
  trims, values large enough to use the MSB TFFs, and scan read-back. It checks the latency formula
  above and counts how often each of these mechanisms ran.
* **`tb_dtw_engine_full`** runs the same checks with all parameters at
  their defaults (20 x 20, up to 2 x 2 sections, including a padded 33 x 27
  run and a padded bypass run). It takes about 20 s in
  Verilator.
* **`tb_ucr_classify`** runs a small time-series classification at the
  default size. It uses two class templates (a bump and a double step),
  one reference series per class and four time-warped, noisy queries of
  28 to 40 samples. Each query is labelled with its nearest reference. It
  checks every distance against software, the latency, and that all four
  labels are right. It takes about 30 s.
* **`tb_dna_bypass`** compares 100 random base sequences (A, C, G, T coded
  0 to 3) of 8 to 20 bases in bypass mode at the default size. It checks
  every distance against software and that every operation takes the same
  time (1047 quanta from `start` to `done`). It takes about 5 s.
