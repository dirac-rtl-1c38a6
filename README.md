# DirAc acquisition engine in SystemVerilog

A GPS M-code receiver that starts without knowing the time accurately must search a
large window of code phase (time) and Doppler (frequency) before it can track the signal.
This design does that search directly on the M-code. It uses a bank of code matched filters
(CMFs) that correlates every new sample against a long reference code segment at once. An
FFT behind the CMFs turns the 16 partial correlations of each sample instant into 16
frequency bins. One block of processing therefore covers a *tile*:

- 51150 time offsets (10 ms at 5.115 Msamples/s);
- 16 bins 50 Hz apart (±400 Hz);
- about 3.3 million correlation cells, refreshed every 10 ms.

Weak signals need longer integration. The tile is computed again on later 10 ms stretches of
signal and the magnitudes are added in an external memory (noncoherent integration), up to
128 times (1.28 s). Before each addition, a per-bin delay line compensates the slow drift of
the correlation peak caused by code Doppler. After the last integration, a detector
thresholds the tile. It writes a report of the cells above the threshold, their neighbours,
the noise floor and the peak into an on-chip RAM, which a host reads over a small register
bus.

Everything runs from one 40.92 MHz clock. A new sample instant (four 2-bit samples) arrives
every 8 clocks, and every block is built around that 8-clock period.

## Data flow

```
 i_usb q_usb i_lsb q_lsb (2 bit, every 8 clocks)
        |
   dirac_interleaver ---- 4 slots, one every 2nd clock (20.46 MHz)
        |
   dirac_cmf_bank: 16 x dirac_cmf (3197 taps each, samples flow CMF 0 -> 15)
        |  per slot and CMF: odd-tap sum and even-tap sum
   dirac_translator ----- 16 x {USB, LSB} x {odd, even} complex values per instant
        |
   dirac_mag_comb ------- 4 FFTs through one dirac_fft32, |.| summed -> 16 bins
        |  8 bin pairs, one per clock
   dirac_cdc ------------ per-bin delay 16 + n*rate (integer + Lagrange fraction)
        |
   dirac_test_mux ------- normal / capture before CDC / capture after CDC
        |
   dirac_nci ------------ read-add-write of the external 512K x 36 memory
        |  (last integration)
   dirac_detector ------- threshold, neighbour flags, noise floor, peak
        |
   dirac_report_ram ----- 2 reports x 32 words x 64 bit, read by dirac_regs
```

`dirac_ctrl` counts time offsets and integrations, tags every instant and switches the
reference code. `dirac_regs` holds the configuration. `dirac_top` wires it all together.

## The code matched filters

`dirac_cmf_taps` is the array of taps of one CMF. Each tap has:

- a 4-stage, 2-bit shift register (one stage per interleaved stream);
- a sign multiplier;
- two code bits: the *active* bit used now and a *shadow* bit that is loaded in the background.

Samples enter tap 0 and move one tap per sample instant. Stage 0 of tap *j* therefore holds
the sample that is *j* instants old, for the stream in the current slot. Its product with the
active code bit is ±1 or ±3 (sign/magnitude 2-bit samples). `dirac_adder_tree` adds the
products of taps 0, 2, 4, … ("odd", counting taps from 1) and of taps 1, 3, 5, … ("even")
separately. The CMF registers both sums once per slot.

The 16 CMFs form one systolic chain: the sample leaving the last tap of CMF *k* enters CMF
*k*+1. At any instant, CMF 0 holds the newest 3197 samples, CMF 1 the next older ones, and
so on. The bank covers 16 × 3197 = 51152 samples, one coherent interval of 10 ms.

**Reference code.** The shadow bits form one serial chain (`code_in`, `code_shift`) that
runs in the same direction as the samples.

- For a code segment that starts at instant *s*, tap *j* must hold chip *c[s−j]*. The
  source therefore shifts the segment in oldest chip first: 51152 chips, one per clock.
- At the first instant of every integration, the controller pulses `code_swap`, which copies
  all shadow bits into the active bits between two slots. At the same moment it pulses
  `code_req` to ask for the next segment.
- Loading takes 51152 of the 409200 clocks of an integration, so the next segment is ready
  long before it is needed.
- The segment for integration *n* is the one 10 ms later than for *n*−1. At time offset *t*,
  every integration therefore correlates the same code phase.

**Power management.** `cmf_en` gates each CMF completely, sample chain included, which is
how a gated clock behaves. A powered-down CMF outputs zeros.
- Standby powers all CMFs down.
- 5 ms mode powers CMFs 8–15 down and halves the tile to 25575 offsets. Those CMFs are at the
  end of the chain, so nothing that is still used sits behind them.
- The `CMF_PD` mask can power down any CMF. A CMF behind a powered-down one then sees held
  samples.

## From correlations to a magnitude column

`dirac_translator` collects the four slot results of every CMF:

- USB = I_USB + jQ_USB;
- LSB = I_LSB + jQ_LSB;
- separately for odd and even taps.

This gives four sets of 16 complex values per instant, held for the whole 8-clock period.

`dirac_mag_comb` sends the four sets, one per clock, through the single `dirac_fft32`.
- **FFT.** `dirac_fft32` is a combinational radix-2 decimation-in-frequency FFT of 32 points
  with one output register. The upper 16 inputs are zero, which interpolates between bins.
  Only bins −8…7 are kept.
- **Input order.** The CMF results are fed oldest first (CMF 15 first). A positive bin index
  therefore means a frequency above the tile centre.
- **Bin spacing.** With 16 points of 0.625 ms each, bins are 50 Hz apart and 100 Hz wide.
- **Magnitude.** Each bin's magnitude is approximated as max(|re|,|im|) + min(|re|,|im|)/2.
  The four magnitudes of a bin are summed.
- **Scaling.** The sum is shifted right by `mag_shift` and saturated to 11 bits. 128
  integrations then fit 18-bit memory cells: 128 × 2047 < 2^18.
- **Output.** The column leaves as 8 pairs of bins on 8 consecutive clocks, one pair per
  36-bit memory word.

## Code Doppler compensation

A Doppler offset also compresses or stretches the spreading code. From one integration to the
next, the correlation peak moves along the time axis by a small, bin-dependent amount.
`dirac_cdc` keeps a 32-deep history of every bin and delays bin *b* in integration *n* by

    d = 16 + n * rate[b]          (samples; rate in signed Q4.12, programmed per bin)

- **Integer part.** Selects a window in the history.
- **Fraction.** Quantised to 1/16, it selects one of 16 rows of a 4-tap Lagrange
  interpolation table. The table (coefficients × 4096) is computed by a function in
  `dirac_pkg`.
- **Bias.** The fixed bias of 16 lets the peak drift either way. The delay is clamped to
  2…29.
- **Reported offsets include the bias.** A peak whose raw offset is τ is stored and reported
  at τ + 16. The host subtracts 16.
- **Start of an integration.** The first offsets of each integration take their delayed data
  from the end of the previous one.

## Noncoherent integration memory

The external memory is 512K × 36 bits.
- **Layout.** Each word holds two 18-bit cells, so one tile takes 51150 × 8 words. The address
  is `{time offset[15:0], bin pair[2:0]}`.
- **Operation.** `dirac_nci` issues one read per bin pair and adds the data returned
  `RD_LAT` clocks later (default 2). It writes the sum back to the same address. The first
  integration writes without reading.
- **Traffic.** One read and one write per clock on separate ports, which a QDR SRAM provides.
- **Output.** On the last integration the sums also go to the detector.

## Detection and the report

`dirac_detector` sees the final tile as a stream of bin pairs, column after column.

**Threshold.** It is either `THR_ABS`, or the noise floor of the last completed report times
`THR_MULT`/16. The noise floor is the mean of all cells of a tile.

**Judging.** A cell is judged one column late, once its t+1 neighbour is known. Its report
entry carries four flags telling whether the neighbours at t−1, t+1, bin−1 and bin+1 also
exceed the threshold. A flush pass after the last column judges that column, so tiles may
follow back to back.

**After the last column:**
- a serial divider computes the noise floor;
- the detector writes two header words;
- it flips the report bank and raises an interrupt.

The report RAM (`dirac_report_ram`, 64 × 64 bit) holds two reports of 32 words:

| word | bits |
|------|------|
| 0 | [63:58] entry count, [57] overflow, [56:39] threshold, [38:21] noise floor |
| 1 | [63:46] peak value, [45:30] peak offset, [29:26] peak bin, [15:0] tile count |
| 2…31 | [63:60] flags {t−1, t+1, b−1, b+1}, [59:56] bin (0 = −400 Hz … 15 = +350 Hz), [55:40] offset, [17:0] value |

At most 30 entries are kept. Further cells set the overflow bit.

## Host registers

Reads return data one clock after `bus_rd` (`bus_rvalid`).

| addr | register |
|------|----------|
| 0x00 | control: [0] run, [1] 5 ms mode, [3:2] test select, [4] relative threshold, [5] standby, [11:8] magnitude shift |
| 0x01 | integrations per tile, 1…128 |
| 0x02 | CMF power-down mask |
| 0x03 | absolute threshold (18 bit) |
| 0x04 | relative threshold multiplier (×1/16) |
| 0x05 | status: [0] report ready (write 1 to acknowledge), [1] bank of the last report, [2] busy, [31:16] tile count |
| 0x10–0x1F | code Doppler rate of bins 0…15 (Q4.12 samples per integration) |
| 0x80–0xFF | report RAM: address 0x80 + 2·word + half, low half first |

**Starting and stopping.** A search starts at the first sample instant after `run` goes high.
It repeats tiles while `run` stays high, and stops at the end of a tile once `run` is low.

**Test modes.** Test select 1 or 2 writes the magnitude column to the memory without
integrating, taken before (1) or after (2) the code Doppler compensation. No report is made
in these modes.

## Where this design departs from, or adds to, the published description

- **Word lengths and encodings** are this design's own:
  - 2-bit sample levels ±1, ±3;
  - 14-bit CMF sums, 19-bit FFT outputs, 11-bit magnitudes, 18-bit cells;
  - memory layout, report format and register map.
- **The magnitude** is the max + min/2 approximation.
- **The CDC table** has 16 fractional steps; the delay range is 2…29 samples.
- **The detector** reports every cell above the threshold and flags neighbours. The noise
  floor is the mean of the tile.
- **Not built:**
  - capture of raw CMF and FFT outputs, the snap-shot memory and the parallel preload of the
    CMF bank (only the two magnitude capture points exist);
  - the sideband front end and the generator of the reference code (the code enters through
    the serial port);
  - the external memory itself (the testbenches have a model);
  - clock tree, power grid and package.
- **Register count.** The taps alone hold 16 × 3197 × (8 + 2) = 511,520 flip-flops. This is
  close to the 519,500 register elements the chip is known to have.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_dirac_cmf \
    rtl/dirac_pkg.sv rtl/*.sv tb/tb_dirac_cmf.sv
./obj_dir/Vtb_dirac_cmf
```

Add `tb/tb_qdr_model.sv` for `tb_dirac_nci` and `tb_dirac_top` (the behavioural model of the
external memory).

`tb/tb_dirac_top.sv` runs the whole engine with 32 taps per CMF and 512 offsets per tile. The
window is then as long as the tile, as in the full design. It generates a random code and a
two-sideband signal with noise, 2-bit quantisation and a carrier on bin +3. It feeds the code
segments the engine asks for and checks:
- a 4-integration search in which the code delay drifts by one sample per integration. The
  programmed code Doppler rate must put the peak at the right offset and bin;
- the same drift without compensation, which must give a lower peak;
- a 5 ms search with a relative threshold;
- capture before and after compensation.

It also counts code swaps, memory read-add-writes, compensated columns, 5 ms tiles,
powered-down CMFs, relative thresholds, flagged entries, both report banks and capture
writes. It fails if any of them never happens.

No testbench runs the top at its full size, 16 CMFs of 3197 taps and 51150 offsets per
tile. One tile takes 409,200 clocks in that configuration. Compiling the Verilator model of
the 818,000 tap registers also takes hours of C++ compilation, so the full-size engine is not
simulated. The largest configuration simulated is the end-to-end one above: 16 CMFs of
32 taps, 512 offsets per tile, up to 4 integrations. The blocks are also simulated on their
own at reduced sizes. Examples are 3 CMFs of 4 taps in `tb_dirac_cmf_bank` and 5 taps in
`tb_dirac_cmf_taps`. The adder tree, FFT, magnitude combiner, compensation, integrator and
detector run at their full widths.
