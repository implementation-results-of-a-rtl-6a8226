# Windowed input stage for a 1024-point streaming FFT

An FFT of a block of samples acts as if the block had been cut out of the signal with a
rectangular gate. Because of this, a strong narrow-band signal (for example radio-frequency
interference) leaks energy into the side lobes of many neighbouring bins. A spectral window
tapers each block toward zero at its edges before the FFT. This lowers the side lobes, at the
cost of a slightly wider main lobe.

This RTL is that window, built as a streaming stage in front of a 1024-point FFT. It works on
complex samples of 14 bits per part, one sample per clock; the intended sample rate is 100 MSPS.
It multiplies the real part and the imaginary part by the same coefficient. The coefficient comes
from a 1024-entry table that steps through the frame in step with the samples. The table holds a
Bartlett (triangular) window.

## Datapath and timing

```
            rst_n ──► window_rom (address counter + 1024 x 10 ROM)
                          │ coef (10)
                          ▼
                        [R] win_reg
                          │
  re_in (14) ─►[R]─► win_mult (2 stages) ─(24)─► bits[22:9] ─►[R]─► re_out (14)
  im_in (14) ─►[R]─► win_mult (2 stages) ─(24)─► bits[22:9] ─►[R]─► im_out (14)
```

* **Latency:** 4 clocks. A sample set up before rising edge *k* appears on `re_out`/`im_out`
  after edge *k+3*. The stages are the input register, the two multiplier stages and the output
  register. The coefficient register runs in parallel with the input register.
* **Throughput:** one complex sample per clock. There are no stalls and no valid signals. Every
  clock carries a sample.
* **Frame alignment:** `rst_n` (asynchronous, active low) clears only the window address
  counter. The first sample clocked in after `rst_n` rises gets coefficient 0, the next gets
  coefficient 1, and so on. The counter wraps after 1023, so the window repeats every 1024
  samples without outside help. A controller that starts FFT frames holds or pulses `rst_n` to
  line the window up with the frame boundary. `win_addr` shows the position that the next
  clocked sample will get.
* The data registers have no reset. For the first four clocks after power-up the outputs carry
  no meaningful data.

## The coefficient table

The ROM stores `coef(a) = a` for `a < 512` and `coef(a) = 1023 − a` for the rest: it ramps
0, 1, …, 511, then 511, …, 0. In general form (`window_pkg::bartlett_coef`), for length `L` and
width `W`:

    k(a)    = a          (a < L/2),   L − 1 − a   otherwise
    coef(a) = round( k(a) · (2^(W−1) − 1) / (L/2 − 1) )

This is a Bartlett window normalised to a peak of 1 and scaled to the largest positive `W`-bit
signed value. The multipliers are signed, so the coefficient's sign bit is always 0. The table is
computed during elaboration, and no memory file is needed. Synthesis therefore sees an
initialised ROM with a combinational read. It keeps only 9 bits per word, because the top bit is
constant.

To use another window, change `bartlett_coef` (or the loop that fills `rom` in `window_rom.sv`).
The datapath does not depend on the shape of the window.

## Fixed-point scaling

The product of a 10-bit coefficient and a 14-bit sample has 24 bits. The output keeps product
bits 22 down to 9:

* Dropping the 9 low bits divides by 512. The window peak is 511, so at the centre of the frame
  the gain is 511/512, just under 1. In effect the product is doubled compared with keeping the
  top 14 bits.
* Bit 23 is dropped without loss. |coef| ≤ 511 < 2^9, so the product always fits in 23 signed
  bits.
* The low bits are truncated, not rounded. The result is `floor(coef · x / 512)`, which rounds
  negative values toward minus infinity. A full-scale input of −8192 at the peak gives −8176.

Bits are lost because a 14-bit sample times a coefficient below 1 is truncated back to 14 bits.
At the frame edges, where the coefficients are small, most of the sample's resolution is gone.
With a 14-bit fixed-point FFT behind it, the chain's limited dynamic range sets a noise floor far
above that of a floating-point reference. The window lowers leakage only down to that floor.

## Modules

| file | what it is |
|---|---|
| `rtl/window_pkg.sv` | default sizes (14, 1024, 10) and the coefficient formula |
| `rtl/window_rom.sv` | address counter (clear on `rst_n`, wraps at `WIN_LEN−1`) and ROM, combinational read |
| `rtl/win_mult.sv` | signed `A_W × B_W` multiplier, two-clock pipeline: partial products of `a` with the low (unsigned) and high (signed) halves of `b`, then their sum |
| `rtl/fft_window.sv` | the top: input, coefficient and output registers, two `win_mult`, truncation |

Parameters of `fft_window`: `N` (sample width, 14), `WIN_LEN` (window length, 1024) and `WIN_W`
(coefficient width, 10). The truncation follows `WIN_W` (it keeps bits `[N+WIN_W−2 : WIN_W−1]`).
For lengths that are not a power of two, the counter wraps at `WIN_LEN−1`.

## What is not here

* **The FFT itself** and **the state machine** that drives the window reset together with the
  FFT's write, start and done signals. This stage is only the input of that system. The FFT's
  interface is defined elsewhere. A controller would drive `rst_n` and read `win_addr`.
* **Variants that were only suggested**, not built: a RAM in place of the ROM, so that the window
  could change at run time; a half-length ROM for symmetric windows; an up/down counter that
  would produce the Bartlett ramp without any table.
* **Timing closure.** The two-stage multipliers and the registers around the ROM are arranged for
  a 100 MHz clock on an FPGA. No timing or area numbers are given here for any device.

## Departures and choices

* The reset is active low and asynchronous, and it clears only the address counter.
* `win_addr` is an extra output that lets a frame controller see the window position.
* The internal pipelining of the multiplier is this design's own. Only the two-clock latency and
  the signed, full-precision behaviour are fixed.
* The ROM contents are computed in SystemVerilog rather than loaded from a file.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_window_rom`: checks the counter and the ROM word on every clock for two full frames,
  including both wraps, and checks a mid-frame reset. The expected values come from the plain
  0…511…0 description.
* `tb_win_mult`: sends corner operands (±full scale, 0, ±1) and 2000 random pairs, one per clock,
  and checks each product exactly two edges later. A single-clock pulse pins the latency.
* `tb_fft_window`: runs the whole stage at its default size for a little over three frames. Its
  reference model computes `floor(coef·x/512)` independently of the RTL and compares every output
  exactly four clocks after its input. It also counts the mechanisms it must exercise, and fails
  if one never occurs: window wrap, mid-frame restart by reset, downward rounding of a negative
  product, and the peak coefficient applied to a full-scale sample.
* `tb_window_spectrum`: passes one frame of a complex tone through the stage. The tone sits
  midway between bins 100 and 101, the worst case for leakage. The testbench then takes a DFT of
  the raw frame and of the windowed frame. Twenty bins from the tone, the leakage is −31.8 dB
  without the window and −63.1 dB with it. The test requires an improvement of at least 20 dB. It
  also checks the gain in the tone's bin, which is 0.64 here: about 1/2 for a triangular window,
  with less scalloping loss at the half-bin offset.

To run one with Verilator 5:

    verilator --binary --timing --assert -y rtl rtl/window_pkg.sv tb/tb_fft_window.sv \
              --top-module tb_fft_window -Mdir obj_tb
    ./obj_tb/Vtb_fft_window

Substitute `tb_window_rom`, `tb_win_mult` or `tb_window_spectrum` to run the other tests. Lint with
`verilator --lint-only -Wall -y rtl rtl/window_pkg.sv rtl/fft_window.sv --top-module fft_window`.
The only warnings are unused product bits, which are the intended truncation, and package
constants that a given module does not use.
