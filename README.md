# Block-circulant DNN inference accelerator

A fully-connected layer computes `a = f(W x)`. When the `m x n` weight
matrix `W` is built from `p x q` square blocks that are each *circulant*
(every row is the row above rotated right by one), a `k x k` block is fully
defined by one length-`k` vector `w_ij`, and its product with a vector is a
circular convolution:

    C_ij x_j = ifft( fft(w_ij) o fft(x_j) )          (o = element-wise product)

Storage drops from `m*n` to `p*q*k` weights, and the work per block from
`k^2` multiply-adds to two length-`k` FFTs and `k` complex products. With
`k = 128` a network of 2048-wide layers shrinks by about 100x.

This RTL is an inference engine for such layers. It keeps the weight
*spectra* `fft(w_ij)`, computed off line, in an on-chip RAM, so each block
needs only one forward FFT (of the input segment) and one inverse FFT. The
forward FFT of the real input is done at half length by packing pairs of
real samples into complex ones. One FFT/IFFT engine, whose size is chosen
at run time, serves both transforms, and the partition size `k` can differ
from layer to layer.

All arithmetic is 12-bit fixed point in the `(1,5,6)` format: 1 sign bit,
5 integer bits, 6 fraction bits, so values lie in [-32, 32) in steps of
1/64.

## How one layer is computed

For row block `i = 0..p-1` and, inside it, column block `j = 0..q-1`, one
block goes through six phases in a fixed order:

| phase | unit | what happens | cycles |
|-------|------|--------------|--------|
| PACK  | `pack_loader`   | `t_i = x[jk+2i] + j*x[jk+2i+1]`, `i < k/2`, loaded into the FFT engine (zero past the layer's true input length) | k/2 |
| FFT   | `fft_core`      | k/2-point forward FFT of `t` | (log2 k - 1) * ceil(k/4/BF) |
| POST  | `rfft_postproc` + `periph_unit` | bins 0..k/2 of the k-point FFT of the real segment, each multiplied by the stored bin of `fft(w_ij)` | k/2 + 1 |
| ILOAD | `periph_unit`   | full k-point product spectrum loaded into the FFT engine (upper bins rebuilt as conjugates) | k |
| IFFT  | `fft_core`      | k-point inverse FFT | log2 k * ceil(k/2/BF) |
| ACC   | `periph_unit`   | real parts added into the row accumulator `a_i` (cleared at `j = 0`) | k |

After the last column block of a row, WB (`k` cycles) writes
`ReLU(a_i)` (or `a_i`), saturated to 12 bits, to the activation buffer.
Rows at or past the layer's output length `m` are not written. Each phase
begins with a one-cycle start pulse and ends with a registered done pulse,
which adds 2 cycles per phase. A whole layer takes

    cycles = p*q*(12 + k/2 + (log2k-1)*ceil(k/4/BF) + k/2+1 + k + log2k*ceil(k/2/BF) + k)
           + p*(k + 2) + 2

from the `start` pulse to the `done` pulse. That is 557 cycles per block
for `k = 128` and `BF = 4`. The testbenches check this formula exactly.

The partial products are added in the time domain after every IFFT,
following the block-by-block algorithm. Summing in the frequency domain
first would save IFFTs, but it is not what this design does.

## Units

```
                 +-------------------+
 host  --cfg-->  |  bc_controller    |--- phase starts / done ---+
                 +-------------------+                           |
                                                                 v
 act_buffer --x--> pack_loader --> fft_core <--> rfft_postproc --> periph_unit
     ^                              ^   |  (two read ports)     |  ^   |
     |                              |   +-------- IFFT out ---------+   |
     |                              +--- IFFT load (Hermitian) ---------+
     +------------------ ReLU(a_i) write-back --------------------------+
 twiddle_rom (BF+1 ports) feeds fft_core and rfft_postproc;
 weight_ram (fft(w_ij)) feeds periph_unit.
```

* **`fft_core`**: the FFT/IFFT engine. It is an in-place radix-2
  decimation-in-time transform over an `N`-entry register array (default
  `N = 128`). Samples are written in natural order and stored
  bit-reversed. A run of size `n = 2^cfg_log` does `log2 n` stages of
  `n/2` butterflies, `BF` butterflies per clock. Smaller transforms use
  part of the array and every `(N/n)`-th twiddle. The inverse uses
  conjugated twiddles. Two combinational read ports let the
  post-processing read `T[m]` and `T[M-m]` in the same cycle.
* **`rfft_postproc`**: turns the half-length complex FFT into the spectrum
  of the real segment (next section).
* **`pack_loader`**: forms the packed complex input and applies the zero
  padding.
* **`periph_unit`**: everything that is not an FFT. It does the
  element-wise product with the weight spectrum and keeps the `k/2+1`
  products. It loads the IFFT input, adds the IFFT outputs into the
  accumulator (20 bits, 6 fraction bits), and applies ReLU, saturation
  and write-back.
* **`bc_controller`**: the loop and phase FSM. It also derives the
  FFT size (`k/2` forward, `k` inverse) and the per-stage scaling masks.
* **`bc_memory`**: groups `twiddle_rom`, `weight_ram` and `act_buffer`.
* **`bc_accel_top`**: wires the units. It also multiplexes the shared
  FFT engine's load and read ports according to the phase.

## Real-input FFT by packing

A real length-`k` segment `s` is packed into `t_i = s_2i + j*s_2i+1`
(`M = k/2` complex samples), and `T = FFT_M(t)` is computed. Then, for
`m = 0..M`:

    A = T[m mod M],   B = conj(T[(M-m) mod M])
    X[m] = ( (A + B) - j * W_k^m * (A - B) ) / 2,      W_k^m = exp(-2*pi*j*m/k)

`X[0..M]` are the first `k/2+1` bins of `FFT_k(s)`. The rest are their
conjugates, so nothing else is needed. `W_k^m` is entry `m*N/k` of the
twiddle ROM. This is why the ROM holds `N/2+1` entries: the last one is
`W^(N/2) = -1`. Bins 0 and `M` come out real (up to rounding).

Because the weights are real too, the weight RAM stores only bins
`0..k/2` of each `fft(w_ij)`. Before the IFFT, `periph_unit` rebuilds bins
`k/2+1..k-1` as `conj(P[k-a])`. The IFFT output is then real, up to
rounding; only its real part is used.

## Fixed point and scaling

* Data, weight spectra and the IFFT input/output are `(1,5,6)` words.
  Twiddles are 12-bit words with 10 fraction bits (cos = 1 is 1024).
* Every multiply is rounded back to the data word with round-half-to-even
  and saturated (`bc_pkg::round_sat`). Ties must go to even. Rounding ties
  up biases the index-0 IFFT output, whose path always takes the `+`
  butterfly leg, by a fraction of an LSB per stage. Summed over many
  column blocks, that bias grows to several LSBs.
* **Scaling.** By default the forward FFT does not scale, and the IFFT
  halves on every stage (so it divides by `k`). This is fine for
  zero-mean inputs. Pixels and ReLU outputs, however, are non-negative.
  The DC bin of 128 such values (mean 0.5) is about 64, which saturates
  the [-32, 32) range. The per-layer field `cfg.fshift` moves `fshift`
  halvings from the IFFT to the *last* `fshift` stages of the forward
  FFT. The gain of FFT-multiply-IFFT stays exactly `1`. Only where the
  rounding happens changes. With `fshift = 2` the whole-network tests in
  `network_tb` stay within 0.12 rms of the exact result (rms activations
  0.05-0.6). With `fshift = 0`, the DC bins of pixel inputs saturate
  and the first layer's output is wrong.
  Choose `fshift` from the expected input mean: 0 for zero-mean data,
  2-3 for non-negative data.
* The 128-point FFT alone (`fft_quant_tb`, inputs uniform in [-1, 1],
  no scaling) ends up about 0.06 rms (4 LSB) per bin from the exact DFT.
  Its average L2 distance over the 128 bins is 0.66.
* Accuracy is bounded by the 12-bit word. Expect errors of a few LSBs per
  block, growing roughly with the square root of the number of column
  blocks. The testbenches use tolerances measured on random data; they
  are not bit-exact models.

## Memory layout and programming

**Weight RAM** (`W_DEPTH = 95,940` complex words). Block `(i,j)` of a layer
with `q` column blocks and partition size `k` starts at
`w_base + (i*q + j)*(k/2+1)`, and word `m` of it is bin `m` of
`fft(w_ij)` rounded to `(1,5,6)`. Here `w_ij` is the first column of the
circulant block, i.e. `C_ij[r][c] = w_ij[(r-c) mod k]`. Layers are placed
one after another, so a whole network stays resident.

**Activation buffer**: two banks of `ACT_DEPTH = 3072` words. A layer reads
bank `cfg.in_bank` and writes bank `~cfg.in_bank`, so consecutive layers
just alternate `in_bank`.

**Running a layer** (`bc_pkg::layer_cfg_t`):

| field | meaning |
|-------|---------|
| `logk`   | log2 of the partition size `k`, 2..log2 N |
| `p`, `q` | `ceil(m/k)`, `ceil(n/k)` |
| `n_in`, `m_out` | true input and output lengths (zero padding / dropped rows) |
| `w_base` | first weight word of the layer |
| `in_bank`| input bank; the output goes to the other |
| `relu`   | apply ReLU on write-back |
| `fshift` | forward-FFT stages that halve, `< logk` |

1. Write all weight spectra through `w_we/w_addr/w_wdata`.
2. Write the input vector through `act_we/act_bank/act_addr/act_wdata`.
3. For each layer, hold `cfg` and pulse `start`. Wait for `done` (`busy`
   is high in between), then flip `in_bank` for the next layer.
4. Read the result through `act_bank/act_addr/act_rdata`. This read is
   combinational.

All memories read combinationally and write on the clock edge. The reset
(`rst_n`, active low) is synchronous and clears the control state only.
The datapath arrays are not reset. Every word is written before it is
read.

## Sizes and evaluated networks

Defaults: `N = 128`, `BF = 4`, `W_DEPTH = 95,940`, `ACT_DEPTH = 3072`.

| network (k = 128 for every compressed matrix) | blocks | weight words | widest vector | cycles (all layers) |
|---|---|---|---|---|
| 784-2048-2048-1024-1024-512 (MNIST, matrices 1-5) | 592 | 38,480 | 2048 | 336,514 |
| 3072-2048-2048-2048-2048-2048-512-10 (SVHN, matrices 1-7) | 1,476 | 95,940 | 3072 | 833,196 |

Both fit; the weight RAM is sized for the second one exactly. The MNIST
network's final 512x10 softmax layer is kept dense in the original
design. It is not run here: the host does it (5,120 multiply-adds).

At 557 cycles per `k = 128` block, and counting each block as its dense
equivalent of `2*k^2` operations, the engine does about 59 equivalent
operations per clock. That is far below the multi-TOPS figures reported
for the original FPGA implementation, whose FFT parallelism is not
published. `BF` raises the butterfly parallelism. Up to `BF = N/2`, one
FFT stage runs per cycle, but the k-cycle phases (load, accumulate,
post-process) then dominate.

## Departures from the original design

* One FFT/IFFT engine, as in the published block diagram. The reported
  12-bit FPGA build fits two.
* Transforms larger than `N` (split into smaller FFTs plus a final
  butterfly stage) are not supported. Any `k` up to `N` is.
* Only ReLU is implemented as the activation function. There is no bias
  addition, no softmax, and no training or back-propagation.
* The data word is fixed at `(1,5,6)` in `bc_pkg`. The `(1,3,4)` and
  `(1,7,8)` variants the original compares need edits to `DATA_W`/`FRAC_W`
  (and to `TW_W`, `ACC_W`).
* This design adds its own: the activation buffer, the half-spectrum weight
  layout, the `fshift` scaling, the rounding mode, the phase handshakes
  and the memory-based FFT engine structure.

## Files and simulation

`rtl/`: `bc_pkg.sv` (types, formats, rounding), `bc_accel_top.sv`,
`bc_controller.sv`, `fft_core.sv`, `rfft_postproc.sv`, `pack_loader.sv`,
`periph_unit.sv`, `bc_memory.sv`, `twiddle_rom.sv`, `weight_ram.sv`,
`act_buffer.sv`.

`tb/`: one self-checking testbench per module (`<module>_tb.sv`), plus
`network_tb.sv` for the two whole networks and `fft_quant_tb.sv`, which
measures the error of the 128-point FFT over 300 random real input sets in
[-1, 1]. Each prints
`TB_RESULT checks=N failures=M`. The reference values are computed in
double precision inside the testbench: DFTs for the transforms, and the
circulant matrix-vector product for the layers. `bc_accel_top_tb` runs
four layers with different `k`, padding, dropped rows, ReLU, bank
alternation and forward scaling. It counts each of these mechanisms and
fails if one never occurs.

Example with plain Verilator (package first):

    verilator --binary --timing --assert -Wno-fatal \
        rtl/bc_pkg.sv rtl/twiddle_rom.sv rtl/weight_ram.sv rtl/act_buffer.sv \
        rtl/bc_memory.sv rtl/fft_core.sv rtl/pack_loader.sv rtl/rfft_postproc.sv \
        rtl/periph_unit.sv rtl/bc_controller.sv rtl/bc_accel_top.sv \
        tb/bc_accel_top_tb.sv --top-module bc_accel_top_tb -o sim
    ./obj_dir/sim

`network_tb` takes a few seconds and about 1.2 M cycles. The others take
well under a second.
