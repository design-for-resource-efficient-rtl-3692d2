# Real-data sparse FFT processor

This RTL computes the spectrum of a very long real signal, N = 2^21 samples,
when only a few hundred frequencies in it carry signal. It does not run a
2M-point FFT. Instead it takes a few short P-point transforms of randomly
reordered sub-sampled copies of the signal. In each short transform, it keeps
the strongest bins. It then works out which long-transform frequencies are
consistent with the strong bins of *every* short transform. The value of each
such frequency is the average of what the short transforms saw there.

The key fact is how a reordering acts on the spectrum. Take a data set built
from samples `x[(a·n + c) mod N]`, with `a` odd and so invertible modulo N.
Its spectrum is the long spectrum with its frequencies permuted by `a^-1`.
Keep P of those N samples and take a P-point transform. Bin `b` of that
transform then collects N/P consecutive entries of the permuted spectrum.
Each bin therefore stands for N/P specific frequencies of the original
signal, and a different multiplier `a` gives each bin a different set of
frequencies. A true tone is strong in every set. A frequency that is strong
in one set only by sharing a bin with a tone will, with high probability,
land in an empty bin of another set.

The default configuration is built for a 2 GHz input and a 100 MHz clock:

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 2^21 | length of the long transform |
| `P` | 16384 | length of each short transform |
| `L` | 4 | number of reordered data sets (short transforms) |
| `S1` | 2 | parallel FHT streams |
| `KD` | 512 | dominant bins kept per short transform |
| `W`, `WC` | 18, 18 | data and coefficient width |
| `CF` | 16 | fractional bits of window and sine coefficients |
| `REPL_LIMIT` | (P/2 − KD)/5 = 1536 | cap on heap replacements per scan |

Memories are split into eight banks. A "woctad" is one word from each bank,
that is eight samples, and most units move one woctad per clock.

## Processing chain

One `start` pulse runs one complete operation. `sfft_top` chains five
stages:

1. **Reordering and windowing** (`srg_window_unit`). For each set `t` and
   each woctad, it reads eight sample indices from the data address memory
   (DAM). It also reads eight window coefficients from the window coefficient
   memory (WCM). The eight indices always hit eight different banks of the
   external data-space memory (DSM), so eight samples arrive per clock. Eight
   multipliers apply the window. The result goes to that set's
   transform-space memory (TSM). One set takes P/8 clocks.
2. **Short transforms** (`rfht_engine` + `hs2fs_psd`). There are `S1` streams.
   Stream `s` handles sets `s, s+S1, …`. It starts a set as soon as the
   front end has finished writing it, so the front end and both streams
   overlap. Each stream computes a real-data FFT through a fast Hartley
   transform (FHT). It converts the Hartley output to Fourier form and writes
   that back into the set's TSM. It writes |X[k]|² into the set's power
   spectrum memory (PSM).
3. **Dominant bin location** (`dominant_bin_locator`, one per set). A
   min-heap scan finds the KD largest PSD values. Their bin numbers go to the
   dominant bin memory (DBM). The bins are also marked in a P/2-bit bin
   indicator array (BIA, `bia_mem`).
4. **Frequency filtering** (`foi_filter`, one per set). It expands dominant
   bins into candidate frequencies, the "frequencies of interest" (FOI). It
   then tests each candidate against the BIAs of the other sets. Survivors
   go to the frequency address memory (FAM).
5. **Spectrum estimation** (`spectrum_estimator`). For each survivor, it
   averages the L Fourier values from the TSMs and writes
   `{Re, Im, frequency}` to the sparse spectrum memory (SSM).

Stages 1–2 run per set and overlap. Stage 3 starts per set as soon as that
set's PSD is complete. Stage 4 waits until all locators have finished, since
every filter needs every BIA. Stage 5 waits until all filters have finished.

## The FHT engine

This is the most involved block. `rfht_engine` is one processing element
(PE) that computes a P-point radix-4 FHT in place. Its PE data memory (PDM)
holds P words. It delivers eight outputs per clock.

**Load (P/16 clocks).** Two woctads, 16 samples, are read from the TSM per
clock. They are written to the PDM at dibit-reversed addresses: the base-4
digits of the index are reversed. The stages can then run in natural order.

**Stage 0 (P/8 clocks).** Each clock takes two neighbouring 4-point groups.
The butterfly's first-stage mode computes two 4-point Hartley transforms.

**Stages s ≥ 1 (P/8 + P/M clocks, M = 4^(s+1)).** A group of M outputs is
built from four sub-transforms `H_r` of length M/4. The Hartley transform
couples index `k` with index `−k`. So one clock reads the pair `H_r[k]` and
`H_r[M/4−k]` from all four sub-transforms: eight words. It produces the
eight outputs that belong to `k` and `−k`. Two points are special:

- `k = 0` and `k = M/8` are their own partners.
- Each takes a clock of its own and writes only half its outputs.

This is why a stage takes P/M clocks more than P/8. Between stages, the
6-clock butterfly pipeline drains.

**The double butterfly** (`rfht_double_butterfly`):

- It rotates each pair `(H_r[k], H_r[−k])` by the angle `2πrk/M`. Three
  rotators (r = 1, 2, 3) use three multipliers each, for 9 multipliers in
  all, in the form `t = c(a+b)`, `U = t − b(c−s)`, `V = t − a(c+s)`.
- Two adder layers then form the radix-4 sums and differences for `+k` and
  `−k` together.
- It is pipelined over four clocks.
- Each stage divides by four, with saturation. The engine therefore returns
  H/P and cannot overflow.

**Coefficients** (`rfht_pcm`, `rfht_coef_gen`):

- Three quarter-wave sine tables of P/4 words each, one per rotation, each
  with a sine and a cosine read port.
- They are loaded through a port before use, with entry `i` equal to
  `round(2^16 · sin(2πi/P))`.
- The generator folds the angle index into one quadrant and fixes the signs.
- It supplies `c`, `c−s` and `c+s`, two clocks after the angle index.

**Unload (P/8 clocks).** Clock `j` presents `H[4j..4j+3]` and their partners
`H[P−4j−i]`. `hs2fs_psd` converts each pair:

- `Re X[k] = (H[k] + H[−k])/2`
- `Im X[k] = (H[−k] − H[k])/2`
- `|X[k]|²` at 36 bits, using eight multipliers.

`Re X[k]` is written to TSM index `k` and `Im X[k]` to index `P−k`, so the
Fourier data take the same space as the input.

At P = 256 the engine takes 228 clocks. At P = 16384 it takes 1024 (load) +
2048 (stage 0) + 6 × 2048 + 1365 (stages 1–6) + 2048 (unload) + drains,
about 18.8k clocks per set.

## Dominant bin locator

`dominant_bin_locator` scans the P/2 PSD values in bin order. It keeps a
KD-entry min-heap of `(value, bin)` pairs in the DBM, with the smallest value
at the root:

- **First KD values.** Each is inserted and sifted up, one level per clock.
- **Later values.** Each is compared with the root. If it is not larger, it
  costs one clock and is dropped. Otherwise it replaces the root, which is
  then sifted down, one level per clock, following the smaller child.
- **Replacement cap.** Replacements are capped at `REPL_LIMIT`. When the cap
  is reached, the scan stops and the heap is kept as it is. For sparse
  signals the cap is rarely reached. At full size, a four-tone test needed
  about 180 replacements per set, and the same tones in strong noise about
  1,420, against a cap of 1536. The cap bounds the worst-case run time.
- **BIA.** The unit clears the BIA a word per clock while scanning. When the
  scan ends, it sets one bit per heap entry.

## Frequency filter

The filter is where the reordering maths lives. Data set `t` was built with
multiplier `a_t`, given to the top as `perm_mult[t]`. The top also takes its
inverse modulo N as `unperm_mult[t]`. Filter `n` works in three steps.

1. **Candidate generation.** The filter takes its share of set `n`'s dominant
   bins: DBM entries `n·KD/L … (n+1)·KD/L−1`. Bin `b` covers the permuted
   indices `m = b·N/P + j` for `j = 0 … N/P−1`. Each index becomes a
   frequency `f = a_n^-1 · m mod N`. That is one multiply per bin, then one
   addition of `a_n^-1` per clock, so the filter emits one candidate per
   clock. For real input, `f` and `N−f` are the same component. A candidate
   above N/2 is therefore folded to `N−f`, and a conjugation flag is kept
   for set `n`.
2. **Stage tests.** There are L−1 stages, three clocks each. Stage `m` maps
   the candidate into set `t = (n+m) mod L` with `a_t · f mod N`. It folds
   the result, takes the bin as the top bits, and reads that bin's bit in
   set `t`'s BIA. A zero discards the candidate at once. The rotated
   assignment means that in any clock the L filters read L different BIAs,
   so each BIA needs only one read port per filter stage.
3. **Storage.** A survivor is written to the filter's FAM region as
   `{frequency, L conjugation flags, L bin numbers}`, with the bins in set
   order. A full region drops further survivors and counts them as overflow.

Each dominant bin belongs to exactly one filter. So a tone is found only if
its bin lands in the slice that set's filter handles. Raising KD or the
number of filters lowers the chance of a miss. Misses also occur when two
tones fall into the same bin of one set.

## Spectrum estimator

For each FAM entry, `spectrum_estimator` does the following:

- It reads `Re X_t[bin_t]` from all L TSMs, and on the next clock
  `Im X_t[bin_t]` from index `P − bin_t`.
- It negates the imaginary parts of conjugated sets.
- It sums the L values in a log2(L)-stage adder tree and divides by L.

It produces one component every two clocks. The SSM holds
`{Re[W−1:0], Im[W−1:0], frequency[log2 N−1:0]}` and is read through
`ssm_raddr` with one clock of latency. `ssm_count` gives the number of valid
entries.

The value reported is the short-transform value, H/P after the engine's
scaling. A tone `A·cos(2πfn/N + φ)` under a rectangular window therefore
reads about `(A/2)·(cos φ, sin φ)`.

## Memories

All multi-bank memories are `woctad_ram`: eight true dual-port banks with
one clock of read latency. Sample `i` lives in bank `i mod 8`, slot `i div 8`.

| Memory | Size at defaults | Use |
|---|---|---|
| DAM | L·P indices of 21 bits | sample index `(a_t·n + c_t) mod N` for each set |
| WCM | L·P × 18 | window coefficient per set and sample |
| TSM | L × P × 18 | windowed data, then Fourier data |
| PSM | L × P/2 × 36 | power spectrum |
| PDM | S1 × P × 18 | FHT working memory |
| PCM | S1 × 3 × P/4 × 18 | sine tables |
| DBM | L × KD | heap of (PSD, bin) |
| BIA | L × P/2 bits | dominant bin flags |
| FAM | L × KD/L entries | filter survivors (`sdp_ram`) |
| SSM | KD entries | sparse spectrum (`sdp_ram`) |

At the defaults this is about 6.15 Mbit, or 0.34 M words of 18 bits. The
datapath uses 58 multipliers:

- 8 for windowing;
- 17 per FHT stream;
- 4 per filter.

The DSM (2^21 samples) is outside this RTL. Its eight bank read ports are
ports of `sfft_top`: `dsm_en`, `dsm_addr[8]` and `dsm_rdata[8]`, with one
clock of read latency.

## Using `sfft_top`

Before `start`, load the following:

- **DAM and WCM**, one woctad per clock through `dam_we/dam_slot/dam_wdata`
  and `wcm_we/wcm_slot/wcm_wdata`. Slot `t·P/8 + j` holds samples
  `8j … 8j+7` of set `t`. A DAM entry is the plain sample index
  `(a_t · n + c_t) mod N` with `a_t` odd. A WCM entry is a signed
  coefficient with CF fractional bits (65536 = 1.0).
- **The sine table**, through `pcm_we/pcm_addr/pcm_data` (written into both
  streams). Entry `i` is `round(2^16 · sin(2πi/P))`, for `i = 0 … P/4`.
- **The multipliers**: `perm_mult[t] = a_t` and `unperm_mult[t] = a_t^-1 mod N`
  for each set.

Then pulse `start`. `busy` stays high until a one-clock `done`; after it, read
the SSM. The status outputs help when tuning KD and the cap:

- `loc_repl` and `loc_limit_hit` per locator;
- `fam_count` and `fam_overflow` per filter;
- `foi_count` per filter.

## Timing

At the defaults, one operation must finish within one update period:
2^21 samples at 20 samples per clock, or 104,858 clocks.

- The full-size simulation of a four-tone signal took **69,056 clocks**.
- With ±20000 of uniform noise added, it took **79,356 clocks**. The noise
  fills every bin, and each locator made about 1,420 replacements, still
  under the 1536 cap.
- The worst case lets every locator hit the replacement cap, adding
  1536 × (log2 512 + 2) clocks, for about 86k clocks in all.
- The filter stage takes `KD/L · N/P` = 16,384 clocks plus a short delay.
- The front end takes L·P/8 = 8192 clocks, overlapped with the FHT streams.

## Where this RTL departs from the published architecture

- **PDM.** The PDM is one multi-ported array, not eight single-port banks
  with a conflict-free address mapping. The original mapping is not
  reproduced. A bank-level implementation would need it.
- **Stage length.** FHT stages s ≥ 1 take P/8 + P/M clocks instead of P/8,
  because `k = 0` and `k = M/8` get a clock each.
- **Scaling.** Each FHT stage divides by four. The published design does not
  state its scaling.
- **Direct unload.** The Hartley outputs go straight from the PDM to the
  converter. They are not first written back to the TSM.
- **Real-data mirror.** Frequencies above N/2 are folded, and conjugation
  flags are carried from the filter to the estimator. The published design
  works on the half spectrum without saying how mirrored indices are
  treated.
- **Multipliers as inputs.** The permutation multipliers and their inverses,
  and the DAM contents, come from outside. There is no random-number
  generator in the RTL.
- **No overlap with acquisition.** The data sets are read from a DSM that is
  already full. Overlapping acquisition with processing is left to the
  system around the core.
- **FAM regions.** Each filter has its own FAM region of KD/L entries, and
  overflow is dropped and counted.
- **Locator details.** The locator caps replacements at 20% of the P/2 − KD
  possible, and it drops values equal to the heap minimum.
- **Number formats.** Coefficient formats, rounding (arithmetic shifts),
  pipeline depths and reset behaviour are this design's own choices.
  Resets are asynchronous and active-low, on control state only.

## Verification

Every block has a self-checking testbench in `tb/`. Each compares the block
against a model computed inside the testbench, uses `$urandom` stimulus, has
a watchdog, and ends with a `TB_RESULT checks=… failures=…` line.

| Testbench | What it checks |
|---|---|
| `tb_woctad_ram`, `tb_sdp_ram`, `tb_bia_mem` | memories against arrays, collisions, clear-over-set priority |
| `tb_rfht_pcm`, `tb_rfht_coef_gen` | table ports and (c, c−s, c+s) for every angle |
| `tb_rfht_double_butterfly` | both modes against the radix-4 Hartley step |
| `tb_rfht_engine` | P = 256 transforms against a direct DHT (within 3 LSB), exact cycle count |
| `tb_hs2fs_psd` | Re, Im, PSD and TSM write addresses |
| `tb_srg_window_unit` | reordering, windowing, saturation, timing |
| `tb_dominant_bin_locator` | heap content against a sorted reference, BIA, cap |
| `tb_foi_filter` | survivors against a brute-force search over all frequencies |
| `tb_spectrum_estimator` | averaging and conjugation at L = 8 (three adder levels) |
| `tb_sfft_top` | end to end at N = 4096, P = 256, KD = 16 |
| `tb_sfft_full` | one complete operation at the default parameters |

`tb_sfft_top` runs several operations on tones plus noise. It checks:

- each tone handed to a filter is reported with the right frequency;
- each such value is within 3% of `(A/2)e^{jφ}`;
- candidate counts and run time are correct.

It counts each mechanism and fails if one never happens:

- both FHT streams busy at once;
- heap replacements;
- the replacement cap ending a scan;
- filter discards;
- FAM overflow (a second instance with KD = 64);
- conjugated entries.

`tb_sfft_full` instantiates `sfft_top` with no parameter overrides. It runs
two complete operations, one on clean tones and one with noise, and checks
each against the 104,858-clock update period. It runs in well under a
minute.

To simulate with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl rtl/*.sv tb/tb_sfft_top.sv \
          --top-module tb_sfft_top -o sim
./obj_dir/sim
```

Replace `tb_sfft_top` with any other testbench name. The testbenches need
no data files: tables and stimulus are computed in SystemVerilog. Each file
in `rtl/` starts with a comment that gives its interface, timing and
internal choices.
