# Digital self-interference cancellation for a full-duplex SDR transceiver

A full-duplex radio sends and receives on the same frequency at the same time.
Its own transmission leaks back into the receiver at a level far above any
wanted signal. After RF isolation has done what it can, the leftover has to be
removed digitally. To do that, the receiver predicts the leaked signal from the
known transmit samples and subtracts the prediction.

The leak is not a plain delayed copy of the transmit samples:

- the power amplifier compresses the signal;
- the I/Q modulator adds a mirror image and carrier (LO) leakage;
- the coupling path between the antennas acts as a multipath channel.

This RTL implements the *extended Hammerstein* canceller (eDSIC) from
"Full-Duplexing with SDR Devices: Algorithms, FPGA Implementation and Real-Time
Results". The canceller models all three effects and adapts them with LMS, one
iteration per clock at 60 MHz. The RTL also contains the baseband transceiver
around the canceller: TX sample buffer, gain, resampling between the 32 MS/s
host rate and the 120 MS/s converter rate, RX DC removal and IF-to-baseband
shift, and the clock crossings.

## The canceller model

For each transmit sample x[n], the canceller builds three things:

1. **PA branch**: `r = x · (1 + F(|x|))`. F is a complex gain that depends on
   the amplitude. It is a second-order (quadratic) B-spline through 10 complex
   control points `q[0..9]`:
   - |x| covers 0..8, split into 8 unit-wide regions.
   - A sample in region i uses control points i, i+1 and i+2.
   - The weights are the three quadratic B-spline basis values of the fraction u.
2. **Impairment branch**: `t = h0 + h1·x* + h2·|x|²·x*`. These terms cover LO
   leakage (constant), the I/Q image (conjugate) and the image of the
   amplifier's cubic term.
3. **Channel**: `s = r + t` enters an M = 60 tap complex FIR, `y = Σ w_k s[n-k]`.

The output is `e = d − y`, where d[n] is the received sample aligned with x[n].

All three coefficient sets adapt by LMS on e:

- **w** uses the usual complex LMS step over all 60 taps.
- **q** and **h** sit in front of the FIR. Their exact gradient would need all
  60 taps, so only a window of τ = 5 taps is used. The window is centred on the
  strongest tap, which is assumed to be at index `M_PRE`.

The magnitude |x| has no square root:

    |x| ≈ 0.96043387·max(|I|,|Q|) + 0.397824735·min(|I|,|Q|)

With a knot spacing of 1 and 12 fractional bits, the integer part of |x| is the
region index and the fraction is the spline abscissa u. The basis values then
need only one squarer, u², plus shifts and adds.

### Pipeline and timing (`rtl/edsic.sv`)

The pipeline advances one step for every accepted (x, d) pair (`in_valid`). At
one pair per clock, e appears five cycles later, as in the published design:

| stage | work |
|---|---|
| 1 | \|x\| estimate (`mag_approx`), \|x\|² |
| 2 | region index and abscissa (`spline_abscissa`), basis values (`spline_basis`), \|x\|²·x* |
| 3 | r (`spline_lut` read, `pa_spline_model`) and t (`impairment_model`) |
| 4 | s shifted into the FIR delay line (`multipath_fir`) |
| 5 | e = d − y, registered |

The coefficient update (`lms_adapt`) uses e one sample after it was produced,
which makes this a delayed LMS. To keep the regression aligned with that e:

- the FIR delay line has one extra entry;
- side delay lines keep x, the spline index, the basis values and |x|²·x for
  the τ-tap window.

Every product of an iteration is computed in parallel. All 60 taps, 3 impairment
coefficients and 10 control points update in the same clock.

### Number formats

| quantity | format |
|---|---|
| x, d, e, converter samples | 16-bit signed Q4.12 (range ±8), as in the published design |
| r, t, s, \|x\|²·x | 18-bit Q6.12 |
| coefficients in the datapath | 18-bit Q3.15 |
| coefficient accumulators | 32-bit, 28 fractional bits; the datapath reads `acc >>> 13`, saturated |
| step sizes | powers of two: `mu = 2^-mu_*`, with 5-bit shift inputs |

Every multiplier input is at most 18 bits wide, so each real product fits an
18×25 DSP block. Complex products use three real multiplications
(`cplx_mult`). Shifts truncate and results saturate. The published design says
only that its internal widths were "chosen based on simulations", so the
internal widths above are this design's own.

## The transceiver (`rtl/fd_transceiver_top.sv`)

```
clk120 domain                                             clk60 domain
host TX -> tx_loop_buffer -> digital_gain -> interp 15/4 -> DAC
                                            |
                                            +-> tx_delay (z^-n) -> decim 1/2 -> FIFO -> x[n] \
ADC (14b) -> dc_correction -> freq_shift -> decim 1/2 -------------------------> FIFO -> d[n] -> edsic
host RX <- decim 4/15 <- switch <- interp 2/1 <- FIFO <------------------------------- e[n] /
                            ^--- uncancelled baseband
```

- **`tx_loop_buffer`**
  - The host writes one block of up to 130,000 samples once.
  - With `tx_play` set, the block is replayed without end; `tx_wrap` pulses on
    its last sample.
  - Writes are refused while playing.
- **`digital_gain`**: multiplies by a signed Q4.12 gain and saturates.
- **`lin_interp_resampler`** and **`lin_decim_resampler`**: rational resamplers
  built on linear interpolation. The decimator has a `[1 2 1]/4` pre-filter.
  - 32 → 120 MS/s is P/Q = 15/4.
  - 120 → 32 MS/s is P/Q = 4/15.
  - The 60 ↔ 120 MS/s paths use 1/2 and 2/1.
- **`tx_delay`**: the z^-n alignment delay on the copy of the DAC stream that
  becomes x[n]. The delay is `tx_delay_n + 1` clocks at 120 MHz.
- **`dc_correction`**: subtracts a running mean with time constant 2^12 samples.
- **`freq_shift`**:
  - A 32-bit phase accumulator drives a 1024-entry sine table, which is computed
    at elaboration, and a complex multiplier.
  - The output frequency is `f = rx_phase_inc / 2^32 × 120 MHz`. For example,
    `32'hF000_0000` shifts by −7.5 MHz.
- **`async_fifo`**: 16-deep dual-clock FIFOs with Gray-coded pointers. They
  carry x, d and e between the domains.
- **Switch**: `rx_sel_cancelled` picks whether the host receives the cancelled
  stream e or the raw baseband stream.

The canceller steps when x and d are both waiting and the return FIFO has
room. `fifo_overflow` is a sticky flag that is set if an x or d FIFO was ever
full when written; it should stay low when clk60 is exactly half of clk120.
`cap_valid/cap_x/cap_d` bring out each aligned pair the canceller consumed, so
the host can estimate the loop delay by cross-correlation.

### Setting the alignment delay

The canceller expects d[n] to contain the leak of x[n − M_PRE]. This gives the
FIR `M_PRE` pre-cursor taps for the spread of the channel and resampling
filters. To set it up:

1. Measure the loop delay L in 120 MHz samples (DAC port to ADC port plus the
   RX chain) by cross-correlating `cap_x` and `cap_d` with `tx_delay_n = 0`.
2. Program `tx_delay_n ≈ L − 2·M_PRE`.

The end-to-end testbench uses a channel delay of 20 and `tx_delay_n = 12`.

### Controls

All control inputs are quasi-static host registers. They cross no
synchronisers, so change them only while the affected path is idle.

- `adapt_en` starts and stops adaptation.
- `coef_clear` zeroes w, q and h. With all coefficients zero, e equals d.
- `mu_w`, `mu_q` and `mu_h` set the step-size shifts. The testbenches use 7, 6
  and 6.

## Parameters

| module | parameter | default | origin |
|---|---|---|---|
| top, edsic, lms_adapt | `M` | 60 | published design |
| | `TAU` | 5 | published design |
| | `M_PRE` | 5 | own choice (not given) |
| | `K` (regions), Q = K+2 control points | 8, 10 | published design |
| top, tx_loop_buffer | `TX_DEPTH` / `DEPTH` | 130000 | published design |
| top, tx_delay | `MAX_DELAY` | 64 | own choice |
| top, async_fifo | `FIFO_AW` / `AW` | 4 (16 entries) | own choice |
| dc_correction | `SHIFT` | 12 | own choice |
| freq_shift | `LUT_BITS` | 10 | own choice |

## Where this RTL departs from the published design

- **Resampler latency**: the published design reports 6 cycles for each of
  interpolation and decimation at 120 MHz, about 183 ns in total for the
  cancellation path. The linear resamplers here take 1–2 cycles. The loop
  latency is therefore different; it is dominated here by the FIFO
  synchronisers.
- **Resampler filters**: the filters are not given. Linear interpolation and a
  `[1 2 1]/4` decimation pre-filter are the simplest choices. They give little
  image and alias rejection.
- **Delayed LMS**: the pipelined update uses e one sample late. It is not stated
  how the original handles this.
- **Resource use**: the DSP and LUT counts of the published design (502 DSP48 at
  M = 60) are not reproduced. Here, every product of an iteration has its own
  multiplier, with three real multiplications per complex product.
- **Arithmetic**: step sizes are powers of two; shifts truncate rather than
  round.
- **Left out**: host software, DMA engines, converters and RF parts are not
  included. They appear as ports.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/edsic_pkg.sv \
          tb/tb_edsic.sv --top-module tb_edsic
./obj_dir/Vtb_edsic
```

Which testbench covers what:

- **`tb_fd_transceiver_top`** runs the whole design at its default parameters.
  - It acts as the host and closes the loop from the DAC port to the ADC port
    through a behavioural radio. The radio models PA compression, I/Q image,
    LO leakage, a 3-tap channel, a 7.5 MHz IF, a DC offset and 14-bit
    quantisation.
  - It checks the DAC stream sample by sample.
  - It counts that every mechanism occurs: buffer wrap, capture, canceller
    output, both switch positions, coefficient clear and adaptation.
  - It requires at least 20 dB of cancellation at the host port; about 25 dB is
    reached after 64,000 adaptation steps. It also requires that no FIFO
    overflows.
- **`tb_edsic`** feeds the canceller alone with a synthetic leak and checks:
  - the 5-cycle latency;
  - that e = d with adaptation off;
  - at least 30 dB of cancellation (about 38 dB is reached);
  - that the full model beats a model with the impairment branch frozen by at
    least 6 dB.
- **`tb_edsic_ofdm`** runs the canceller at its default parameters on looped
  LTE-like OFDM blocks clipped to about 7 dB PAPR: 600 QPSK subcarriers
  (10 MHz) and 1200 64-QAM subcarriers (20 MHz). Each case requires at least
  25 dB of cancellation after 60,000 iterations; about 32 dB is reached.
- **Bit-exact or tolerance models** check every sub-block. These testbenches
  compare against values computed independently in the testbench:
  - `tb_mag_approx`, `tb_spline_*`, `tb_pa_spline_model`,
    `tb_impairment_model` and `tb_multipath_fir`;
  - `tb_lms_adapt`, which is bit-exact against an integer model of the updates;
  - the resampler, FIFO, delay, gain, DC and frequency-shift testbenches, which
    also check rates and latencies.

Convergence to the final level takes millions of iterations in hardware. The
testbenches run tens of thousands, which reaches the initial fast convergence
only.
