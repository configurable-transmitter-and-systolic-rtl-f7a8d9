# ST/DDST transmitter and systolic channel estimator

In superimposed training (ST), a known periodic pilot sequence `c(k)` of period `P` is added
on top of the data symbols. No time slots are spent on training. The receiver averages the
received block over its `Np = N/P` periods. This *cyclic mean* is an estimate of the
channel acting on one pilot period. The data leak into that average, though, and limit the
accuracy. Data-dependent superimposed training (DDST) fixes this. The transmitter also adds a
sequence `e(k)`, computed from the block's own data, that cancels the data's contribution to
the cyclic mean. For each position `r` within the period, `e` is minus the mean of the data
symbols at positions `r, r+P, r+2P, ...`.

Once the data are cancelled, the cyclic mean `y` of a received block equals `C h`, exactly
apart from noise:

- `h` is the channel impulse response, assumed no longer than `P` taps.
- `C` is the `P x P` circulant matrix built from one pilot period.

The channel estimate is therefore `h = C^-1 y`, a fixed matrix-vector product.

This repository holds synthesizable SystemVerilog for both ends of such a link:

- **`ddst_transmitter`** is a configurable baseband transmitter. It supports ST or DDST
  training, 4/16/64-QAM and a bypass mode, and adds a cyclic prefix. It accepts one
  symbol per clock.
- **`sysdce`** is a systolic DDST channel estimator. A single linear array of `P`
  complex multiply-add elements computes both the cyclic mean and the product with `C^-1`.
- **`ddst_top`** places the two side by side. They share only the clock and reset.

The default sizes are `N = 512` data symbols per block, `P = 8` (also the channel length
and the prefix length), and a pilot power of `sigma_c^2 = 0.2` of a unit total power. At
these sizes the estimator produces the cyclic mean 591 clocks after a start pulse and the
full channel estimate 606 clocks after it. Both counts are checked in simulation.

## Number formats

Every complex sample is a packed struct `cplx_t {re, im}` of two signed 16-bit words in
Q2.13, so the range is ±4 with a resolution of 2^-13. The constants have their own
formats:

- Mapper normalisation factors: unsigned Q0.16.
- `C^-1` coefficients: signed Q0.15.

Every requantisation truncates toward minus infinity; no rounding is done.
The systolic array keeps 4 guard bits below the sample LSB in its partial sums, so the
products summed along a row are truncated to 17 fractional bits and the result is truncated
only once, when it leaves the array. Truncating every product straight to 13 bits piles up
about half an LSB of bias per product, and costs about 12 dB of estimator accuracy.

The shared types and the constant functions live in `ddst_pkg`. The only real-number
arithmetic in the design is done at elaboration: the pilot table, the normalisation table
and `C^-1`.

The pilot sequence is a chirp:

    c(n) = sigma_c * exp(j*pi*n*(n+2)/P)     (n+1 instead of n+2 for odd P)

Its DFT has constant magnitude, so `C` is always invertible. The first column `g` of
`C^-1` is computed by a DFT at elaboration:

    g(m) = (1/P) * sum_k exp(j*2*pi*k*m/P) / lambda_k,
    lambda_k = sum_n c(n) * exp(-j*2*pi*k*n/P)

At the default power, `|g| = 1/(P*sigma_c) ≈ 0.28`.

## Transmitter

    IN_TX ─► symbol adequator ─► mapper ─┬─► data sequence transformer ─► mux ─► reg ─► OUT_TX
                                         └──────────── (bypass) ──────────┘
             tx_control (IDLE → LOAD → DRAIN)     tx_agu (all addresses)

### Symbols and the shared constellation

The mapper stores only the eight axis levels of Gray-coded 64-QAM, `{+3,+1,+5,+7,-3,-1,-5,-7}`,
indexed by a 3-bit code. The I and Q parts read this LUT through two ports. 4-QAM and 16-QAM
are embedded in the 64-QAM grid, on levels ±1 and on levels ±1, ±3. The
**symbol adequator** (`sym_adequator`) re-codes their point numbers so that the same LUT
produces them:

| constellation | input | I code | Q code |
|---|---|---|---|
| 4-QAM | `s[1:0]` | `{s1,0,1}` | `{s0,0,1}` |
| 16-QAM | `s[3:0]` | `{s3,0,s2}` | `{s1,0,s0}` |
| 64-QAM | `p[5:0]` | `p[5:3]` | `p[2:0]` |

The **mapper** (`qam_mapper`) multiplies each level by a factor from a 16-entry
normalisation LUT. The LUT is addressed by `{bypass, tx_mode, map_mode}`. The factor combines
the constellation's own scaling (`1/sqrt(2)`, `1/sqrt(10)`, `1/sqrt(42)`) with the data
amplitude of the chosen mode:

- ST: `sigma_b^2 = 1 - sigma_c^2`.
- DDST: `sigma_b^2 = (1 - sigma_c^2) * Np/(Np-1)`. Removing the per-position mean takes away
  a fraction `1/Np` of the data power, and this factor restores it.
- Bypass: the constellation factor alone.

### Superposition, prefix and the DDS loop-back

The **data sequence transformer** (`data_seq_transformer`) runs in two overlapping phases.

**Write phase** (`N` clocks):

- Each mapped symbol `b(k)` is added to `c(k mod P)`, read from `training_seq_gen`, and
  written into the cyclic-prefix RAM (`st_cp_inserter`) at address `k`.
- At the same time, `b(k)` enters the **DDS generator** (`dds_generator`). This unit has to
  sum the symbols of each period position without buffering the block in another order. A
  `P`-stage shift register (`lb_delay`) solves this: it hands back, with every new symbol,
  the running sum that was formed `P` clocks earlier, which belongs to the same position.
  The new sum is written into a `P`-word RAM and pushed back into the shift register. After
  `N` symbols, the RAM holds the `P` sums `Np * mean_r`.

**Read phase** (`N+P` clocks):

- The prefix RAM starts reading one clock after word `N-P` has been written, at address
  `N-P`. The `P` prefix words therefore leave while the last `P` data words are still being
  stored. The reads then continue over `0..N-1`, so the block leaves without a gap and with
  its prefix in front.
- In step with these reads, the DDS RAM is swept `Np+1` times. Each value is shifted right
  by `log2(Np)` and negated, giving `e(k) = -mean`. The extra sweep covers the prefix.
- The output multiplexer selects `b+c` (ST) or `b+c+e` (DDST).

`tx_control` is a three-state machine: IDLE, LOAD (`N` symbols accepted), and DRAIN (until
the last output). It gives the enables. `tx_agu` derives every address from counters.

### Interface and timing

1. Pulse `start_tx` while `tx_busy` is low, with the modes set:
   - `tx_mode`: 0 = ST, 1 = DDST;
   - `map_mode`: 1/2/3 = 4/16/64-QAM, 0 = no data;
   - `byp_mode`: 1 = bypass.
2. Supply one point number on `in_tx` in each of the next `N` clocks.

Output timing:

- **ST/DDST:** the `N+P` outputs are contiguous and marked by `data_val_tx`. The first is
  registered `N-P+5` clock edges after the edge that samples `start_tx`.
- **Bypass:** the normalised symbols leave without pilots or prefix, each 2 clocks after it
  was sampled.

A new block can start once `tx_busy` falls.

## Channel estimator (SYSDCE)

    IN ─► DATINF (P memories × Np words) ─┐
                                          ├─► operand mux ─► MSYSMVM (P PEs) ─┬─► shifter ─► CM_OUT
                    ICLUT (ring of P regs) ┘                                  └─► H_OUT
                    CU: one cycle counter drives every enable

### The partitioned cyclic mean

Write the received block (without its prefix) as a `P x Np` matrix `X`, with column `i`
holding period `i`. Then the cyclic mean is `y = (1/Np) X 1`.

The estimator cuts `X` into `Np/P` square blocks `B_i` of size `P x P` and accumulates
`sum_i B_i 1_P`. Each `B_i 1_P` is an ordinary matrix-vector product with the vector of ones.
The systolic array computes it with its multipliers bypassed, so every element simply adds
its operand.

**DATINF** (`datinf`) stores sample `k` with fixed wiring, where `LP = log2 P`:

- memory number `k[2LP-1:LP]`;
- address `{k[log2N-1:2LP], k[LP-1:0]}`.

Reading one address from all `P` memories then yields one row of one block.

**MSYSMVM** (`msysmvm`) is a linear array of `P` processing elements (`sysdce_pe`), each
followed by a register.

- Element `j` receives its operand through a `j`-clock delay line. The operands of one row
  therefore meet the partial sum as it ripples down the array.
- A row issued at clock `t` leaves the array at `t+P`. That is exactly when the matching row
  of the next block is entering.
- Feeding the output back into the first element (*loop-back*) accumulates the rows of
  successive blocks with no extra memory.
- After `Np` reads, an arithmetic shift by `log2(Np)` gives the `P` cyclic-mean values. They
  leave on `cm_out` and are also stored in the array's `P` vector registers.

### C^-1 without a P-port ROM

For `h = C^-1 y` the array multiplies. Element `j` holds `y_j`, and row `t` of `C^-1` arrives
on the vertical inputs in clock `t`. Because `C^-1` is circulant, each row is the previous
one rotated by one place.

The **ICLUT** (`iclut`) is therefore a ring of `P` registers:

- After reset it holds the first row of `C^-1`.
- It rotates once per clock while it feeds the array.

This costs `P` words instead of the `P^2` that a `P`-port ROM would occupy.

The `P` products of row `t` leave the array `P` clocks later as `h_t`. The guard bits are then
dropped and the output is saturated to the sample format.

### Schedule

`sysdce_cu` runs everything from one counter. Write `S = N+P`, and let `t` count clocks after
the start pulse.

| phase | clocks `t` |
|---|---|
| store the `N+P` input samples (the first `P` are dropped) | `1 .. S` |
| read DATINF, all memories in parallel | `S .. S+Np-1` |
| loop-back active | `S+P+1 .. S+Np` |
| cyclic mean out (`cm_flag` in mode 0), into the `y` registers | `S+Np+1 .. S+Np+P` |
| mode 1: ICLUT rows enter, ring rotates | `S+Np+P .. S+Np+2P-1` |
| mode 1: `h_0 .. h_(P-1)` on `h_out`, `done` high | `S+Np+2P .. S+Np+3P-1` |

The last cyclic-mean value comes `(N+P)+(Np+P-1)` clocks after start, and the last
coefficient `2P-1` clocks after that: 591 and 606 at the defaults. At a clock of about
115 MHz this is roughly 5.1 µs and 5.3 µs per block.

### Interface

1. Pulse `rx_start` (`start` on `sysdce`) while busy is low. Set `rx_mode` to 0 for the
   cyclic mean only, or 1 for the channel estimate.
2. Present the `N+P` received samples, prefix first, one per clock, starting in the clock
   after the pulse.

`cm_flag` marks `y_0..y_(P-1)` on `cm_out`. `done` marks `h_0..h_(P-1)` on `h_out`.

## Where this design makes its own choices

The published architecture leaves the following points open or inconsistent. These are the
choices made here:

- **Sign of `e`.** One equation writes the DDST transform as `(I - G) b`, and another writes
  `e = G b`. The implementation follows `I - G`, so `e = -mean`; that is the sign that cancels
  the data.
- **Word width and formats.** The 16-bit Q2.13 samples, Q0.16 normalisation factors,
  Q0.15 coefficients and the 4 guard bits of the array (`GX` on `msysmvm`) are chosen here. Two 16-bit outputs fit the transmitter's published pin
  count.
- **Control encodings.** The encodings of `tx_mode`, `map_mode` and `byp_mode` are chosen
  here.
- **Bypass output.** Bypass sends the normalised mapper output with no pilots and no prefix.
- **Busy outputs and start handshakes.** These are additions.
- **Internal latencies.** The register stages, and hence the transmitter latency, are this
  design's own.
- **DATINF address fields.** These follow the address formulas rather than the field widths
  drawn in the block diagram, where the two differ.
- **16-QAM labels.** One 16-QAM label is printed twice in the published constellation map.
  The re-coding follows the systematic Gray pattern of the other labels.
- **`C^-1` quantisation.** `C^-1` is derived from the unquantised pilots. Its Q0.15 format
  requires `|g| < 1`, which bounds how small `sigma_c` may be made.
- **Size constraints.** `N` must be a multiple of `P^2`, and `P` and `Np` must be powers of
  two.
- **Scope.** The channel, noise, equaliser and detector of a complete receiver are not part
  of the RTL. The end-to-end testbench models the channel behaviourally.

## Verification

Every module has a self-checking testbench, `tb/tb_<module>.sv`. Each compares the outputs
against values computed independently in the testbench and ends with a
`TB_RESULT checks=... failures=...` line. `tb_sysdce` checks the 591 and 606 cycle counts.

`tb_ddst_top` runs the full design at the default sizes. It sends transmitter output
through a random 8-tap complex FIR channel into the estimator, covering:

- DDST with 4/16/64-QAM: the estimate must match the channel to within 0.004 per component;
- cyclic-mean mode, against `C h`;
- ST mode, with a loose check, since the data disturb the estimate;
- bypass.

It also checks that each prefix repeats the block's tail, and it counts every mechanism:
each mode and constellation, prefix insertion and removal, loop-back, multiplier bypass
and ICLUT rotations. A mechanism that never occurred counts as a failure.

Two further testbenches run the kind of evaluation a DDST designer cares about, at full size:

- **`tb_ddst_mc`** runs a Monte Carlo test of the link. It sends DDST 4-QAM blocks through
  random 8-tap Rayleigh channels with white Gaussian noise, 10 trials at each of
  5, 10, ..., 30 dB SNR. A floating-point estimator works on the same received samples.
  The hardware's mean square error matches the floating-point one within 0.5 dB, and it
  matches the ideal DDST figure `sigma_n^2 / (N sigma_c^2)` per tap within 2 dB. The
  hardware estimate differs from the floating-point one by a mean SQNR of about 65 dB.
- **`tb_tx_sqnr`** sends 17 random blocks in each of the six transmitter configurations and
  compares them with a floating-point transmitter. The mean SQNR per configuration is 74 to
  82 dB, limited by the 13-bit fraction of the output.
  It also looks at the spectrum at the `P` pilot frequencies (every `Np`-th DFT bin). In ST
  mode the data there sit about 10 dB below the pilots. In DDST mode they are cancelled to
  about −73 dB, which is the property the estimator relies on.

The Monte Carlo run is much shorter than a full characterisation; raise `TRIALS` for
tighter statistics.

To simulate with Verilator 5:

    verilator --binary --timing -Irtl -y rtl +libext+.sv rtl/ddst_pkg.sv tb/tb_ddst_top.sv --top-module tb_ddst_top
    ./obj_dir/Vtb_ddst_top

Any other testbench runs the same way with its name in place of `tb_ddst_top`. The
parameters `N`, `P` and `SIGMA_C2` can be overridden on `ddst_transmitter`, `sysdce` and
`ddst_top`. All tables are recomputed at elaboration.
