# Digital core of an ultra-low-power sub-GHz transceiver and a 60 GHz duobinary modulator

This RTL holds the logic of two radio designs built from digital standard cells.

1. **The sub-GHz GMSK transceiver.** Its local oscillator is a ring DCO made of standard cells. A 40 MHz reference is injected into the DCO, which locks it (injection locking). Fractional-N synthesis comes from a digital-to-time converter (DTC). The DTC delays each injected reference edge by exactly the amount the fractional frequency needs. Everything that decides codes is digital and lives here:
   - frequency acquisition;
   - the bang-bang phase loop;
   - DTC control and three background calibrations;
   - the TX baseband that modulates the PLL directly;
   - the all-digital RX IF stage.

   The oscillator, the DTC, the phase detector and the RF/analog front end are timing or analog circuits. They are not RTL. The testbenches replace them with behavioural models.
2. **The 60 GHz differential duobinary modulator.** It is an oversampled duobinary precoder and encoder. They drive a semi-digital FIR, whose taps are switched unit currents.

The top, `dig_trx_top`, puts both designs side by side. Each has its own ports. The transceiver's register interface (SPI) is not built, so every control is a top-level port.

## Injection-locked PLL control (`ilpll_ctrl`)

The DCO runs near N × f_ref. Every reference edge (delayed by the DTC) is injected into it and pulls the DCO phase into line. Three loops keep the DCO centred. They run in turn:

- **FLL (`fll_ctrl`).** It counts DCO cycles over 2^7 reference periods and compares the count with the expected divide value. It steps the 3-bit coarse band and the 5-bit medium varactor bank until the error is within ±2 counts. Once locked, it freezes. Pulsing `fll_en` low restarts the search.
- **Phase loop (`bb_dlf` → `dsm1` → `therm_dec` → `fine_code_sync`).** The sub-sampling bang-bang phase detector returns the sign of the edge error: +1 means the injected edge is late, i.e. the DCO is fast. A PI filter with large integral steps turns that sign into a 5-bit fine code plus a fractional part. A first-order DSM dithers the fraction onto the 31 unit varactors. The loop filter is held at mid-scale until the FLL reports lock.
- **Self-clocked fine-code update (`fine_code_sync`).** The fine code is re-timed on the falling edge of the varactor stage's own gate node, V_G. So a varactor never switches while its gate is high, and the update causes no phase step.

Fractional-N path:

- `fcw_acc` accumulates the 16-bit fractional FCW and gives, each cycle, the divide value N or N+1.
- `dtc_dcw_gen` scales the residual phase by the coarse gain word `gc` into a 14-bit DTC word. It splits the word into a 6-bit coarse part (28.6 ps steps) and an 8-bit fine part (0.24 ps steps). It adds the TANC and doubler corrections, then scales the fine part by `gf`.
- **Gain calibration (`dtc_gain_lms`, used twice).**
  - A sign-LMS correlates the detector decision with the centred DTC code, delayed to match the loop latency. It integrates the product into `gc`.
  - A second instance does the same for `gf`, using the fine residue of the DTC word.
  - Both words start at 512 and settle at 16·T_dco/T_coarse and 4·T_coarse/T_fine.
- **TANC (`tanc_lut`).** It keeps one accumulator per coarse DTC code. The decision of each cycle goes only to the entry of the coarse code that produced it. So each entry converges to that code's delay error, and the entry is added to the fine word. This removes the per-code nonlinearity of the coarse stage without interpolating between codes.
- **Reference-doubler duty correction (`refd_dcc`).** With the doubler on, odd and even edges come from different clock phases. Correlating the decision with the edge parity gives the half-skew. The fine word gets it added on odd edges and subtracted on even ones.

**Latency matters here.** The detector's decision for a DTC word arrives two reference cycles after the word. Every correlator (both LMS instances, TANC, DCC) delays its code by `DELAY = 2`. If you change the pipeline, change `DELAY` with it.

## TX digital baseband (`tx_dbb`)

The transmitter modulates the PLL itself: the 8-bit `fcw_mod` is added to the fractional FCW.

- `/8` and `/10` dividers of the 40 MHz clock give 5 MHz and 0.5 MHz strobes.
- `gmsk_mod` samples `tx_data` on `tx_clk` and maps each bit to ±127.
- `gauss_filter` upsamples ×10 and shapes with a BT = 0.5 Gaussian FIR to 10 bits at 5 MHz.
- `interp_filter` is three ×2 half-band stages (`interp_x2`). They bring the rate to 40 MHz at 12 bits. Each stage's input strobe is delayed one cycle to line up with the previous stage's registered output.
- The result is multiplied by `kmod`, which sets the deviation.

With `tx_en` low, the output is zero.

## RX IF stage (`rx_if`)

The 10-bit, 8 MS/s ADC stream at a 1 MHz IF passes through these blocks in order:

1. `rx_hpf`: a DC-removing IIR.
2. `rx_nco` + `rx_mixer`: quadrature down-conversion.
3. `rx_iir_lpf` (order 1, low latency): LPF1, inside the carrier loop.
4. Carrier loop:
   - `costas_pd` is a sign-Costas detector.
   - `int_dump` integrates it and dumps at 1 MS/s.
   - `cr_loop_filter` is a PI filter that trims the NCO frequency.
5. `rx_iir_lpf` (order 2): LPF2, for blocker attenuation.
6. `mm_timing_rec`: decimation to 0.5 MS/s. It uses a Mueller–Muller detector on the frequency discriminator. The detector stretches or shortens one symbol period by a sample.
7. `diff_demod`: one-bit differential detection.

The demodulator takes the sign of the full-precision cross product of two consecutive symbol samples. So it depends only on the phase step over a symbol, not on the absolute carrier phase. The carrier loop's job is to remove the frequency offset, so that the step is the modulation alone.

**Tested behaviour.** The test signal has a 10 kHz carrier offset, a DC offset, noise and a +300 ppm symbol-rate error. With it, the carrier loop settles near the offset, the timing loop advances as it should, and 1975 bits are received with no errors. The loop gains are this design's choice, not values from the thesis.

## Duobinary modulator (`duobinary_mod`)

- `db_precoder` samples NRZ data on a clock at twice the bit rate, the ×2 up-sampler. It toggles a mod-2 counter once per data period while the bit is 1.
- `db_encoder` turns the rising and falling transitions of the precoded stream into the binary pulses `duo_p` and `duo_n`. Their difference is the three-level duobinary symbol, with alternating signs.
- `semi_digital_fir` runs both streams through 7-tap delay lines. The weights are [-3 0 9 15 9 0 -3], a raised cosine rounded to 5 bits. The signed sum `iout` stands for the summed unit currents.

## Departures and limits

- The widths, rates, DTC resolutions, filter orders and FIR size follow the thesis. These values are this design's own choices:
  - loop gains and step sizes;
  - the FLL window and tolerance;
  - the TANC and DCC fixed-point formats;
  - all RX loop gains.
- The fine-gain LMS settles a few percent above its ideal value (+5 % in the PLL test). The error it correlates with still holds residual coarse-code terms.
- The calibrations are meant to run one after another: gain calibration, then TANC with the gains frozen. Running all of them at once lets them trade errors.
- These are not built: the SPI control logic (its register map is not given), and everything analog (DCO, DTC, detector, injection pulse generator, doubler, PA, LNA/mixer/filters, SAR ADC).

## Simulating

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing -Irtl -Itb rtl/trx_pkg.sv tb/tb_ilpll_ctrl.sv --top-module tb_ilpll_ctrl
./obj_dir/Vtb_ilpll_ctrl
```

Testbench-only models:

- `tb/ilpll_model.sv` is a discrete-time model of the DCO/DTC/detector. It has DCO phase memory, coarse-DTC nonlinearity, doubler skew and jitter.
- `tb/gmsk_if_gen.sv` generates a GMSK IF with noise, DC, and frequency and symbol-rate offsets.

`tb_dig_trx_top` runs the full top at its default sizes through this sequence:

1. FLL lock;
2. fractional-N with gain calibration;
3. TANC and doubler correction;
4. TX modulation;
5. RX at +300 ppm and then −300 ppm;
6. the duobinary modulator.

It fails if any mechanism never happened. The mechanisms are:

- FLL steps and lock;
- DSM activity;
- gain, TANC and DCC updates;
- mode switches;
- deviation of both signs;
- timing advance and retard;
- carrier-loop motion;
- duobinary ±1.

It also checks these values:

- The PLL's rms timing error must stay below 15 ps, both after gain calibration and with TANC on.
- In the last 7.5 ms of RX, the received bits are compared with the sent ones. The bit-error ratio must be below 1 %. In the reference run, 3751 bits were received with no errors.

Typical results of `tb_ilpll_ctrl`, run against the timing model:

| Measurement | Result |
|---|---|
| Integer-N rms timing error | about 3.6 ps |
| Coarse gain `gc` (ideal 607) | 604 |
| Fine gain `gf` (ideal 477) | about 500 |
| rms timing error with ±15 ps coarse-DTC nonlinearity, gain calibration only | 10.9 ps |
| Same, with TANC on | 6.6 ps |
| Doubler correction for a 5 ps odd-edge skew | −21 fine-DTC units (ideal −22) |
