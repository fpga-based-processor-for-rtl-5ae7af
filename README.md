# FPGA feature-detection chain for an ultra-wide-band radar

An ultra-wide-band (UWB) radar sends sub-nanosecond pulses and listens for
their echoes. In this receiver the echo is amplified and split eight ways. Seven
of the copies pass through analog delay lines in 1 ns steps, and each copy is
digitised by its own channel of an 8-channel, 14-bit, 250 MSPS ADC card. This
RTL is the FPGA processing that follows the ADC:

1. It combines the eight channel samples of each sampling instant into one
   reconstructed sample.
2. It buffers the reconstructed samples in a FIFO and groups them into frames
   of eight.
3. It transforms every frame two ways in parallel: an 8-point FFT (range
   profile) and a two-level wavelet decomposition (localisation in time).
4. It runs an ordered-statistic CFAR (constant false alarm rate) detector on
   the transform output. The detector sorts the values by magnitude and
   compares each one with a threshold.

The analog front end, the ADC card, the host processor that reads the results
and the display are not part of this RTL. Their digital signals are the ports
of the top module `uwb_fp_top`.

```
 adc_ch[8] ──► recon_adder ──► sync_fifo ◄── fifo_ctrl (fill/drain)
  (8 x 14b)    (17b sum)          │
                                  ▼
                            frame_buffer (8 x 17b)
                     ┌────────────┴─────────────┐
                     ▼                          ▼
             deinterleave_zp               dwt_haar
                     ▼                    (sum/sub, a2/d2)
                 fft8_dif                       │
              (8 bins x 2 x 20b)                │
                     └──────► cfar_src mux ◄────┘
                                  ▼
                               os_cfar ──► sorted values, detect[8], mux_out, greater
```

## Number formats

| Signal | Width | Format |
|---|---|---|
| ADC channel sample | 14 | unsigned |
| Reconstructed sample (sum of 8 channels) | 17 | unsigned, cannot overflow |
| FFT bin, real and imaginary | 20 | two's complement, modulo 2^20 |
| Wavelet coefficient | 20 | two's complement, never overflows |
| CFAR value | 20 | two's complement; sorted by magnitude |
| CFAR threshold | 20 | unsigned magnitude |

All of these widths come from the source design, except the wavelet
coefficients. They are 20 bits here so that they can share the CFAR input.
Widths and the twiddle constant are in `rtl/uwb_pkg.sv`.

## From eight channels to frames

**Reconstruction** (`recon_adder`). Each `load` strobe brings eight channel
samples. A registered adder tree sums them, and the result appears one clock
later. If all eight channels carry the same sample s, the sum is 8·s. For
example, 0x3fff gives 0x1fff8 and 0x2aaf gives 0x15578. These are the published
reconstruction values, and the top-level testbench checks them. The adder
accepts a new set every clock.

**FIFO and its controller** (`sync_fifo`, `fifo_ctrl`). These are the least
obvious part of the chain. The FIFO runs in two phases:

* **Fill:** while filling, every incoming sample is written until `full` rises.
* **Drain:** once full, the controller reads one word per clock until `empty`
  rises, then returns to fill.

The depth is 8, so every drain delivers exactly one frame of 8 *consecutive*
reconstructed samples. Samples that arrive while the FIFO is full or draining
are not written, and `sample_dropped` pulses once for each of them.

Each round takes the fill time plus 10 clocks: one clock in which the full FIFO
is noticed, 8 reads, and one clock in which the empty FIFO is noticed. Samples
that arrive during those 10 clocks are lost. The effect on throughput:

* **Continuous input** (a `load` every clock): the chain keeps 8 of every 18
  samples, one frame per 18 clocks. 18 clocks is also the shortest possible
  interval between frames.
* **A `load` every p clocks:** the chain keeps 8 of about 8 + 10/p samples.

The alternative was to keep writing during a drain. That would mix old and new
samples in one frame, so this design drops instead. The source describes only
the rule "empty → write, full → read".

The FIFO reads with one clock of latency and signals it with `rd_valid`. It
refuses writes when full and reads when empty, and flags each refusal with
`overflow` or `underflow`. An assertion checks that its occupancy never
exceeds the depth.

**Frame buffer** (`frame_buffer`). This stores each word read from the FIFO in
the next of 8 slots. `frame_valid` pulses for one clock after the eighth word,
and `frame` then holds until the next frame is complete.

## The 8-point FFT

`fft8_dif` is a radix-2 decimation-in-frequency FFT with three butterfly
stages and one register per stage. It has a latency of 3 clocks and accepts a
new frame every clock.

* **Stage 1** forms `x[n] + x[n+4]` and `(x[n] − x[n+4])·W^n` for n = 0..3.
* **Stage 2** does the same within each half, with W^0 and W^2.
* **Stage 3** forms the final sums and differences.

The butterfly graph produces the bins in bit-reversed order (0, 4, 2, 6, 1, 5,
3, 7). The module reorders them, so `out[k]` is bin k.

**Arithmetic.** The 17-bit inputs are zero-extended to 20 bits, and every add
and subtract wraps modulo 2^20.

* **Bin 0** is the sum of the frame, up to 8·(2^17 − 1). It is exact but must
  be read as unsigned. As a signed 20-bit number it appears negative once it
  exceeds 2^19. The CFAR reads it as signed, so a DC value above 2^19 is
  ranked by its two's-complement magnitude.
* **Trivial twiddles:** multiplying by W^0 or W^2 = −j needs no multiplier.
* **W^1 and W^3** use cos(π/4) = sin(π/4) = 181/256 and round half up:
  `(p + 128) >>> 8`. Each needs two constant multipliers, four in all.

The source does not give the twiddle precision. 181/256 with round-half-up
reproduces the published FFT result vector to within one LSB in every bin. No
other fraction width from 6 to 16 bits does better, with floor, truncate or
round.

The published vector has one quirk. Its input `in_x5` is printed as 0x02d35,
but the printed outputs belong to 0x22d35, which does not fit in 17 bits. The
FFT testbench accounts for this: before comparing, it subtracts the 2^17
contribution of that bit from the published outputs.

**Odd bins.** Bins 0, 2, 4 and 6 are exact. Bins 1, 3, 5 and 7 carry two
rounded products, so they can differ from an exact fixed-point DFT with the
same constant by up to 2 LSB. A real input gives conjugate-symmetric bins only
up to that rounding: for example, Re X3 and Re X5 may differ by 1.

## De-interleaving for near targets

`deinterleave_zp` sits between the frame and the FFT. With `deint_en` high, the
FFT sees only the even samples x0, x2, x4, x6, followed by four zeros. The FFT
length, and therefore the bin spacing, does not change. This is the
"halve the samples, zero-pad, keep the FFT size" technique of the source,
applied within one 8-sample frame. The wavelet path always gets the full frame.

The module is combinational and adds no latency.

## Wavelet decomposition

`dwt_haar` filters the frame with a low-pass filter h and a high-pass filter g,
keeps every second output, and decomposes the low-pass branch once more.

* **Level 1** gives `sum0..sum3` and `sub0..sub3`.
* **Level 2** gives `a2[0..1]` and `d2[0..1]`.

The source does not give the filter coefficients. This design uses the
unnormalised Haar pair, h = (1, 1) and g = (1, −1):

* `sum_k = x[2k] + x[2k+1]`
* `sub_k = x[2k] − x[2k+1]`

This pair needs no multipliers and cannot overflow. To use other filters,
replace the two sum/difference loops in `rtl/dwt_haar.sv`.

There is one register per level, so results appear 2 clocks after the frame.

## CFAR detector

`os_cfar` splits its eight inputs into two groups of four and bubble-sorts
each group by magnitude |x|:

* `sort_dir = 0` sorts descending.
* `sort_dir = 1` sorts ascending.

The sorter is sequential. Each clock it makes one full bubble pass, running
compare-exchange on positions (0,1), (1,2) and (2,3) of both groups. Three
passes sort four elements.

After sorting, every value is compared with `threshold`. `detect[i]` is 1 when
`|x_sorted[i]| > threshold`. A multiplexer shows `x_sorted[sel]` on `mux_out`
and its detect bit on `greater`.

Timing and handshake:

* `in_valid` is accepted only while `ready` is high. An assertion checks this.
* `out_valid` pulses 5 clocks after the load.
* The sorted values and the detect bits hold until the next result.

Frames reach the CFAR at least 18 clocks apart, so in the top it is always
ready.

**Source select.** In the top, `cfar_src` chooses what the CFAR sorts:

* `CFAR_SRC_FFT`: the eight FFT real parts. The published CFAR results use
  this source.
* `CFAR_SRC_DWT`: the four level-1 approximations followed by the four level-1
  details.

The block diagram of the source feeds the CFAR from both transforms, but it
does not say how. `cfar_src` is sampled together with each frame.

## Latency of the top

A delay of n clocks means: a signal high in clock cycle t leads to its result
being high in cycle t + n.

| Step | Delay |
|---|---|
| `load` → `sum` written into the FIFO | 1 clock |
| `fifo_full` rises → `frame_valid` (drain of 8 reads included) | 10 clocks |
| `frame_valid` → `dwt_valid` | 2 clocks |
| `frame_valid` → `fft_valid` | 3 clocks |
| `fft_valid` → `cfar_valid` | 5 clocks |

The design uses a single clock. The source clocks the ADC at 250 MHz, and the
testbench uses a 4 ns period. Timing closure at that frequency has not been
checked.

Reset is asynchronous and active low (`rst_n`). The FIFO storage array is the
only state without a reset.

## How far this follows the source

Taken from the source:

* the chain's blocks and their order
* 8 channels, 14-bit samples, 17-bit sums, 20-bit FFT and CFAR words
* the DIF butterfly structure and its output order
* the FIFO with full/empty flags
* the two-level decomposition tree
* two groups of four, bubble sort by magnitude, the threshold comparison
* the signal names `load`, `sum`, `writeen`, `readen`, `dataout`, `sort_dir`,
  `sel`, `mux_out` and `greater`

Chosen here:

* the FIFO depth and the fill/drain-with-drop policy
* the twiddle precision and rounding, fitted to the published result vector
* the Haar coefficients
* pipelining and latencies
* the meaning of `sort_dir = 1`
* the CFAR source select
* how de-interleaving fits into one frame
* a strict `>` in the threshold comparison

Not reproduced:

* A one-bit `dout` signal appears in the published reconstruction waveforms
  without any description of its function, so it is not built.
* The published CFAR waveform shows a second sorted group that is not a
  sorting of its inputs. This design sorts the second group like the first.
* The source says the CFAR works on "the reconstructed signal" in one place
  and on the FFT outputs in another. The FFT outputs are the default here.

## Files

| File | Contents |
|---|---|
| `rtl/uwb_pkg.sv` | widths, twiddle constant, `cpx_t`, `cfar_src_e` |
| `rtl/recon_adder.sv` | 8-channel reconstruction sum |
| `rtl/sync_fifo.sv` | FIFO with full/empty |
| `rtl/fifo_ctrl.sv` | fill/drain controller |
| `rtl/frame_buffer.sv` | 8-sample frame assembly |
| `rtl/deinterleave_zp.sv` | FFT input de-interleaving and zero padding |
| `rtl/fft8_dif.sv` | 8-point DIF FFT |
| `rtl/dwt_haar.sv` | two-level wavelet decomposition |
| `rtl/os_cfar.sv` | sort, threshold, select |
| `rtl/uwb_fp_top.sv` | the chain |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench checks its module against a model written independently in the
testbench: a floating-point DFT for the FFT, an insertion sort for the CFAR, a
queue for the FIFO. Each one prints `TB_RESULT checks=N failures=M` and has a
watchdog.

`tb_uwb_fp_top` runs the whole chain at its default size. The input includes:

* the published sample sequence
* sparse and burst traffic
* both FFT input modes
* both CFAR sources
* both sort directions
* thresholds on both sides of the data

The testbench counts each of these mechanisms and fails if one never occurs.
It also checks that every load ends up in a frame, among the dropped samples,
or still in the FIFO.

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/uwb_pkg.sv tb/tb_uwb_fp_top.sv --top-module tb_uwb_fp_top
./obj_dir/Vtb_uwb_fp_top
```

Replace `tb_uwb_fp_top` with any other `tb_<module>` to test a single block.
Every run finishes in well under a second.
