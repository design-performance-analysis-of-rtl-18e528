# Radar receiver accelerators for a joint radar-communication transceiver

A joint radar-communication (JRC) transceiver reuses its communication
packets (here the data part of an IEEE 802.11ad frame) as radar waveforms.
The receiver compares the echo of each packet with the packet it sent and
works out the range, the direction of arrival (azimuth) and the Doppler
velocity of every target in view. This RTL holds the two hardware
accelerators of such a receiver, as they sit in the programmable logic of an
RF system-on-chip next to an ARM processor:

* a **matched filter** that turns one packet's echo, seen by 32 antennas, into
  a 181 x 1024 map over look angle (-90..+90 degrees, 1 degree apart) and
  range bin;
* a **MUSIC** Doppler estimator that takes the strongest cell of that map over
  100 packets and returns a 200-point pseudo-spectrum whose peak is the
  target's Doppler.

The processor runs what is left: it makes the data, searches the map for its
peak, gathers the peak cell from every packet, and runs **CLEAN**, the loop
that removes each detected target from the maps so that the next one shows.
The processor talks to each accelerator through a DMA engine, one AXI-stream
in each direction. In the RTL those streams are plain valid/ready ports.

## Signal flow

```
            FFT{XMAT} (1024)                          Y  (181 x 1024 per packet)
 processor ------------------+                   +----------------------------> processor
            echo (32 x 1024) |                   |
 processor ------------------+--> matched_filter-+
                                                                 peak search, CLEAN
            Y_MAX (100)                                          (on the processor)
 processor --------------------> music_ip -----------------------> processor
                                          PMUSIC (200, dB)
```

Per target, the processing is as follows:

1. Send every packet's echo through the matched filter and keep the maps.
2. Find the largest |Y| in packet 0. Its row is the azimuth and its column is the range bin.
3. Take that cell from all 100 packets. The target's motion rotates its phase from packet to packet.
4. Send these 100 samples to MUSIC. The peak bin of the returned spectrum is the Doppler.
5. CLEAN: build a clean synthetic echo of the detected target. Send it through the same matched filter, scale its map to the measured peak, and subtract it from the maps. Then repeat from step 2 for the next target.

`rsp_top` places the two accelerators side by side and brings out all their
streams. They share a clock and reset, and otherwise run independently.

## The matched filter (`matched_filter`)

In the time domain, correlating a 1024-sample echo against the sent packet,
for 32 antennas and 181 angles, needs a lot of storage. The filter therefore
works in the frequency domain. A correlation becomes a bin-by-bin product
with the conjugate spectrum of the sent packet. Steering the array toward an
angle is a per-antenna complex weight. For look angle `t`:

```
Y[t] = IFFT( conj(X) .* (1/32) * sum_n a_t[n] * FFT(rx_n) )
a_t[n] = exp(-j*pi*n*sin(theta_t))          half-wavelength antenna spacing
```

Two facts keep the hardware small:

* Only the diagonal of the echo-by-packet matrix product is needed, which is
  one multiply per bin.
* All antennas send the same packet, so one 1024-bin spectrum `X` is enough
  for all of them.

Phases of one packet:

| phase | input | work | clocks (defaults) |
|---|---|---|---|
| XF  | 1024 beats of `X = FFT(xmat)/1024` | stored in the X memory | 1,024 |
| RX  | 32 x 1024 echo samples, antenna by antenna | forward FFT of each antenna; spectra written to 32 bank memories | 32 x 7,169 |
| ANG | none | per angle: read bin m of all 32 banks and X[m] (1 clock), steer (`azimuth_delay`, 1 clock), sum and multiply by conj(X) (`correlation`, 1 clock), inverse FFT, stream the 1024-sample row out | 181 x ~7,172 |

A full packet takes 1,528,351 clocks in simulation, which is 15.3 ms at
100 MHz. Each phase uses a single FFT core at one butterfly per clock, and the
phases do not overlap. That is the main lever for speed: overlapping the RX
loads with the transforms, or running several inverse FFTs at once, would cut
the ANG phase. The steering table (181 x 32 complex values) and the FFT
twiddles are computed when the design is elaborated. They become ROM.

Stream formats:

* Each beat is one complex sample: `{im, re}`, each 24-bit signed Q1.23.
* The echo stream is antenna-major: all 1024 samples of antenna 0, then
  antenna 1, and so on.
* The output is angle-major: row 0 is -90 degrees. `m_y_angle` gives the row
  number.
* `m_y_last` marks the last sample of the packet, which ends one DMA transfer.

**Angle sign convention.** The steering weights are
`exp(-j*pi*n*sin(theta))`. For a target to land on row `theta`, its echo must
carry the opposite phase, `+pi*n*sin(theta)` on antenna `n`. An echo modelled
with the same negative sign as the weights appears at `-theta`.

### FFT core (`fft_core`)

An in-place radix-2 decimation-in-time core with natural-order input and
output:

* The frame is written at bit-reversed addresses.
* log2(N) stages of N/2 butterflies then run, one butterfly per clock.
* The memory is read out in order.

`inverse` selects the sign of the exponent. Every butterfly output is halved,
so both directions return the DFT divided by N. This fixed scaling never
overflows and needs no exponent. Its cost is 10 bits of dynamic range over a
1024-point transform. This is why the map Y is small in absolute terms: it
carries a factor of 1/(N x N x 32). Twiddles are 25 bits. One frame takes
N + (N/2)log2 N + N clocks, which is 7,168 for N = 1024.

## The MUSIC estimator (`music_ip`)

MUSIC scores each Doppler candidate by how little of its steering vector
`a_k[i] = exp(j*2*pi*f_k*i)` lies in the *signal* subspace of the covariance
of the 100 peak samples `x`. The score uses the *noise* subspace `En`:

```
PMUSIC_k = 10*log10( 1 / (a_k^H En En^H a_k) ),    f_k = (k - 100)/200, k = 0..199
```

The covariance is built from the one vector, so `R = x x^H` has rank one.
Its only signal eigenvector is `x/|x|`, with eigenvalue `E = |x|^2`. The
noise-subspace projection therefore has a closed form:

```
a_k^H En En^H a_k = M - |a_k^H x|^2 / E    =>    PMUSIC_k = 10 log10(E) - 10 log10(M*E - |a_k^H x|^2)
```

The engine uses this closed form and runs no iterative eigen-solver (such as
a QR iteration). The result is exact for this covariance. A covariance
averaged over several snapshots would need a real eigen-decomposition (see
the limits below).

The three stages:

* **`music_autocorr`** stores `x` and accumulates `E`, the trace of R. It can
  also return any element `R[i][j] = x_i conj(x_j)` on a read port.
* **`music_noise_subspace`** computes, for each of the 200 bins, the sum
  `c_k = a_k^H x`. This is one complex multiply-accumulate per clock, with
  `a_k` read from a 200-entry phase table through a phase index that steps
  by (k-100) mod 200. It then outputs `D_k = M*E - |c_k|^2` and `E`,
  aligned to the same binary point in 128-bit words. `D_k` is clamped to at
  least 1, since an exact match would give zero.
* **`music_spectrum`** takes two base-2 logarithms (`fx_log2`:
  leading-one position plus an 8-bit-mantissa table) and scales their
  difference by 10/log2(10). The output is signed, with 8 fraction bits, in a
  32-bit word. The error is below 0.02 dB.

One sweep takes 100 clocks to load, then 101 clocks per bin: about 20,300
clocks. Bin 100 is zero Doppler. A bin maps to velocity through the
packet repetition interval and the wavelength, which the processor applies.

## Number formats

| quantity | format |
|---|---|
| echo, X, Y, MUSIC input | complex, 24-bit signed Q1.23 per part (`rsp_pkg::DW`) |
| FFT twiddles, steering weights, MUSIC phase table | 25-bit signed Q1.24 (`rsp_pkg::TW`) |
| MUSIC energy / projection | unsigned integers up to 128 bits |
| PMUSIC | 32-bit signed, 8 fraction bits, dB (`DBW`, `DB_FRAC`) |

All real-to-fixed conversions round and saturate symmetrically, to ±(2^(w-1)-1).
Products are truncated. 24 bits is the narrowest of the fixed-point widths
that located targets without azimuth error. The whole design uses that width.

## Where this RTL departs from the original accelerator

* **Arithmetic.** The original accelerator was floating point, with
  fixed-point variants of 16 to 32 bits. This RTL is 24-bit fixed point only.
  Changing `DW` in `rsp_pkg` changes it everywhere, but only 24 bits has been
  verified.
* **FFT.** The original used a vendor FFT core with block floating-point
  scaling (3,196 cycles per transform). This core is a simple radix-2 core
  with fixed 1/N scaling (7,168 cycles). The packet latency is therefore about
  1.53 M clocks against the original's ~0.83 M.
* **Conjugate in the correlation.** This RTL multiplies by `conj(X)`, so the
  processor sends the plain spectrum of the packet. A design that expects a
  pre-conjugated spectrum would have to send `conj(FFT(xmat))`.
* **Eigen-decomposition.** It is replaced by the closed form above, as
  explained in the MUSIC section.
* **Interfaces.** These are this design's own choices:
  * the antenna-major echo order;
  * the framing of the output streams (`last` per packet or spectrum, plus row and bin numbers);
  * an asynchronous active-low reset;
  * one clock for both engines.
* **Not in the RTL.** The DMA engines, the AXI interconnect, the processor,
  DDR memory, peak search and CLEAN. The streams of `rsp_top` are where the
  DMAs connect.

## Files

| file | contents |
|---|---|
| `rtl/rsp_pkg.sv` | word lengths, complex types, fixed-point helpers |
| `rtl/fft_core.sv` | radix-2 FFT/IFFT |
| `rtl/azimuth_delay.sv` | per-antenna steering by the selected angle |
| `rtl/correlation.sv` | antenna sum times conj(X) |
| `rtl/matched_filter.sv` | the matched-filter accelerator |
| `rtl/music_autocorr.sv`, `music_noise_subspace.sv`, `music_spectrum.sv`, `fx_log2.sv` | MUSIC stages |
| `rtl/music_ip.sv` | the MUSIC accelerator |
| `rtl/rsp_top.sv` | both accelerators with their streams as ports |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_rsp_top` (end to end, reduced size) and `tb_rsp_full` (default size) |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. Each
has a watchdog. For example, from the project root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl rtl/rsp_pkg.sv tb/tb_rsp_top.sv --top-module tb_rsp_top
./obj_dir/Vtb_rsp_top
```

What each testbench checks:

* **Unit testbenches.** They compare against floating-point models computed
  inside the testbench, with tolerances of a few LSB:
  * the FFT against a direct DFT, forward and inverse, with back-pressure and
    a latency check;
  * the matched filter at 64 points, 4 antennas and 7 angles, sample by
    sample against the formula above, plus the location of the peak;
  * MUSIC at full size against 10*log10(E/(M*E - |a^H x|^2)).
* **`tb_rsp_top`** plays the processor on a noisy three-target scene at
  reduced size (64 points, 4 antennas, 7 angles, 16 packets, 32 bins). For
  each target in turn it runs a peak search and MUSIC. Between targets it
  runs a CLEAN pass, whose synthetic echo is built from the detected range,
  angle and Doppler. Every target must come out at its own cell and Doppler
  bin. It also checks that
  each of these actually happened: output back-pressure, input gaps, MUSIC
  sweeps, spectrum back-pressure and the CLEAN pass.
* **`tb_rsp_full`** uses every default. It sends one packet (32 x 1024 echo)
  through the matched filter and checks the peak cell over the whole
  181 x 1024 map. It compares three map rows with a floating-point model,
  then runs one 100-packet MUSIC sweep. It takes a few seconds of simulation
  after about half a minute of compilation.

## Limits worth knowing

* Only one snapshot enters the MUSIC covariance. With several targets in the
  same cell, or a covariance averaged over snapshots, the closed-form
  projection no longer holds. An eigen-solver would then have to replace
  `music_noise_subspace`.
* The matched filter's overall gain is 1/(N^2 x NANT). Echoes far below full
  scale lose resolution to the fixed 1/N FFT scaling. Scale the echo to use
  the Q1.23 range.
* Array reads in the matched filter are registered (one clock), which suits
  block RAM. The 32 bank memories are separate arrays so that all antennas
  can be read in the same clock.
