# Savitzky-Golay smoothing kernel for FPGA

Smoothing a financial time series, such as the daily closing prices of a stock, is a common
first step before the series is used to train a market-prediction model. A Savitzky-Golay
filter does this by fitting a low-order polynomial to a sliding window of points and taking the
fitted value at the window's centre. For a fixed window size and polynomial order the fit
reduces to a fixed FIR filter: every output is a dot product of the window with a constant
coefficient vector. The coefficients depend only on the window size and the order.

This RTL is a streaming FPGA kernel for that filter. It reads a series from the card's global
memory, convolves it with the W coefficients, and writes the smoothed series back. The
structure is a three-stage dataflow: **read**, **convolve** and **write** run at the same time
and are joined by two-entry FIFO streams. In steady state one sample enters and one result
leaves every clock cycle. The filter is chosen at run time by the coefficients the host passes
in. The window size `W` is fixed when the kernel is built.

The reference configuration is a cubic polynomial over an 11-point window, applied to ten assets
of 20000 32-bit samples each.

## What the kernel computes

For a series `x[0..n-1]` and coefficients `coef[0..W-1]` the kernel writes `n-W+1` results:

    y[k] = sat32( (sum_{j=0}^{W-1} coef[j] * x[k+j] + 2^(COEF_FRAC-1)) >>> COEF_FRAC ),   k = 0 .. n-W

- **Samples** are 32-bit signed integers, for example prices in cents.
- **Coefficients** are 32-bit signed fixed-point numbers with `COEF_FRAC = 24` fractional bits
  (real value = `coef / 2^24`).
- **Products and the sum** are kept at full width: 64 bits per product, plus 4 bits of growth
  for 11 taps.
- **Rounding** is half up (add half an LSB, then shift right arithmetically).
- **Saturation**: the result is clipped to the 32-bit range. The Savitzky-Golay weights sum to
  one but some are negative, so extreme inputs can overflow. For prices they never do.
- **No padding**: only windows that lie fully inside the series are computed. A series shorter
  than `W` produces no output, and the kernel still finishes cleanly.
- **Alignment**: smoothing coefficients are symmetric, so `y[k]` is the smoothed value of
  `x[k + (W-1)/2]`. The output series is therefore shifted by `(W-1)/2` samples against the
  input, and the `(W-1)/2` samples at each end have no smoothed value.

### Computing the coefficients

The host computes the coefficients; no RTL does this. With `m = (W-1)/2` and the
`W x (order+1)` matrix `A[i][k] = (i - m)^k`, the coefficient vector is the first row of
`(AᵀA)⁻¹Aᵀ`. Quantise it with `round(c * 2^24)`. For W = 11 and order 3 the real
coefficients are

    (-36, 9, 44, 69, 84, 89, 84, 69, 44, 9, -36) / 429

The testbenches compute them this way in double precision (`tb/sg_tb_coef.svh`). The same
formula works for an even `W`. The centre then lies halfway between the two middle samples.

## The dataflow

```
               +---------+   FIFO   +-------------+   FIFO   +----------+
 global  ----> | sg_read | -------> | sg_convolve | -------> | sg_write | ---->  global
 memory        +---------+  depth 2 +-------------+  depth 2 +----------+        memory
 (read req/rsp)                        coef[W]                              (write)
```

`sg_kernel` starts all three units in the same cycle. Each unit knows from the arguments how
many items it must handle, and finishes by itself:

| unit | handles | finishes when |
|---|---|---|
| read | `n` samples | the last response is accepted |
| convolve | `n` input samples | its pipeline has drained |
| write | `n-W+1` results | the last result is written |

The kernel reports `done` once all three have finished. The units never talk to each other
directly. All coordination happens through the valid/ready handshakes of the two FIFOs.
This is what lets memory latency, arithmetic and memory writes overlap, and what makes a stall
anywhere spread only as far as it must:

- **Slow read responses.** The input FIFO drains, and convolve waits with `s_ready` high.
  No window is lost: the shift register simply does not move.
- **Slow writes.** The output FIFO fills. Convolve's output register then stays occupied and
  its whole pipeline freezes (`adv` low), so it stops taking input. The input FIFO fills, and
  read stops accepting responses (`rd_rsp_ready` low). New requests also stop once
  `MAX_OUTSTANDING` reads are waiting.
- **Steady state.** Each FIFO holds about one element, and each sample passes through in a
  bounded number of cycles.

Two entries per FIFO are enough for full rate. A FIFO's `s_ready` depends only on its
occupancy, not on the consumer's `m_ready`. A two-entry buffer lets push and pop happen in the
same cycle without any combinational path running through the FIFO.

## The convolve unit

This unit holds almost all of the logic: 11 multipliers of 32 x 32 bits and an 11-input adder.

- **Window.** `win[0..W-1]` is a shift register. Each accepted sample shifts every element one
  place down and enters at `win[W-1]`. After the first `W` samples, every further sample
  completes a new window. A fill counter, which saturates at `W-1`, marks that point.
- **Pipeline.** Three register stages follow the window:
  1. `prod[j] = win[j] * coef[j]`, all `W` products in parallel;
  2. `sum_q`, the sum of the products;
  3. `out_q`, rounded and saturated.

  Each stage carries a valid bit. The window has a `win_valid` flag, set when the sample just
  taken completed a window.
- **Stall.** All stages move together when `adv = !out_valid || m_ready`. Input is accepted
  only on such cycles. When the output waits, nothing moves and no result is lost or
  duplicated.
- **Latency.** A result is valid on the third clock edge after the edge that accepted the last
  sample of its window. Throughput is one window per cycle.
- **Coefficients** are latched at `start` and held for the whole series.
- **Finish.** `busy` falls, and `done` pulses, when every input has been taken, all valid bits
  are clear, and the last result has left.

## Interfaces

### Kernel control (`sg_kernel`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `start` | in | 1 | one-cycle request, sampled while idle; latches the arguments |
| `src_addr`, `dst_addr` | in | 64 | byte addresses of the input and output series (4-byte aligned) |
| `n_samples` | in | 32 | input length `n` |
| `coef[W]` | in | 32 each | coefficients; sampled at `start` |
| `busy` | out | 1 | high from the cycle after `start` until the run ends |
| `done` | out | 1 | one-cycle pulse as `busy` falls |

A `start` while `busy` is ignored. To process several series, start the kernel once per series.
For example, the ten assets of the use case take ten runs.

### Global-memory channels

All three channels use valid/ready handshakes. A transfer happens on a rising edge with both
signals high. A valid signal, once raised, is held with stable payload until accepted; assertions in
the RTL check this for the two channels the kernel drives.

| channel | signals | notes |
|---|---|---|
| read request | `rd_req_valid/ready`, `rd_req_addr[63:0]` | one 32-bit word per request; addresses `src, src+4, ...` |
| read response | `rd_rsp_valid/ready`, `rd_rsp_data[31:0]` | in request order; `ready` follows the input FIFO |
| write | `wr_valid/ready`, `wr_addr[63:0]`, `wr_data[31:0]` | one word per beat; no write response |

To attach the kernel to an AXI4 memory port, add an adapter that maps these channels onto
AR/R and AW/W/B and merges words into bursts. A bridge like that is outside this RTL.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `W` | 11 | `sg_kernel`, `sg_convolve` | window size = filter taps |
| `FIFO_DEPTH` | 2 | `sg_kernel` | depth of both FIFO streams |
| `MAX_OUTSTANDING` | 16 | `sg_kernel`, `sg_read` | read requests allowed to wait for data |
| `DATA_W` | 32 | `sg_pkg` | sample width |
| `COEF_W`, `COEF_FRAC` | 32, 24 | `sg_pkg` | coefficient width and fractional bits |
| `ADDR_W`, `LEN_W` | 64, 32 | `sg_pkg` | address and length widths |

The window size of 11, the FIFO depth of 2 and the 32-bit samples belong to the reference
configuration. The other values are this design's own. The polynomial order is not a hardware
parameter: it only changes the coefficient values.

## Performance against the reference workloads

| workload | needs | fits the default build? |
|---|---|---|
| order 3, window 11, 10 x 20000 samples | 11 taps | yes |
| order 4, window 15, 5000 samples (20 KB) | 15 taps | no: rebuild with `W = 15` |
| order 3, window 10, 200 samples | 10 taps | no: rebuild with `W = 10` |

Notes on the table:

- **Series length.** A series of any length up to 2^32-1 streams through. Only `W` samples are
  held on chip.
- **Reference workload.** With a memory that answers every request, the kernel needs
  `n + ~10` cycles per series. That is 20010 cycles per asset, about 200100 cycles for all ten.
  At 300 MHz this is about 0.67 ms. The original FPGA implementation took 0.52 ms for this
  workload, at a clock that is not known here. At one sample per cycle, matching it needs
  about 385 MHz, or a wider datapath.
- **Memory stalls.** In simulation, with a memory that randomly stalls 15 % of cycles and
  returns data after 2-24 cycles, the rate falls to about 1.5 cycles per sample.

## How this departs from the original design

The original kernel was written in C++ with high-level synthesis. This RTL follows its
structure:

- three concurrent units;
- two-entry FIFO streams;
- a local window of `W` samples, shifted by one per new sample;
- `W` multiplications in parallel;
- work starting once `W` samples are in.

The following choices are this design's own:

- **Number format.** Only "32-bit" samples were specified. This RTL uses 32-bit integers and
  fixed-point coefficients. A single-precision floating-point version would need FP
  multipliers and an FP adder tree in `sg_convolve`. The rest of the kernel would stay the same.
- **Window storage.** The local window was described as kept in block RAM. Reading `W` samples
  in parallel every cycle needs registers, so the window is a shift register here.
- **Ends of the series.** Only windows fully inside the series are produced (`n-W+1` outputs).
  The companion GPU version computed one output per input element.
- **Pipeline depth, memory protocol, outstanding-read limit, start/done handshake, rounding and
  saturation** were not specified, and were chosen here.
- **Coefficients** arrive as a kernel argument. W is a build-time parameter.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`. A watchdog ends
any run that hangs. The packages must come first on the command line; the rest is found by
module name:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_sg_kernel rtl/sg_pkg.sv tb/tb_sg_kernel.sv
    ./obj_dir/Vtb_sg_kernel

| testbench | what it shows |
|---|---|
| `tb_sg_kernel` | The full reference workload, ten assets of 20000 samples at default parameters, against a stalling memory. Every result is compared with a 128-bit reference convolution. One asset runs on an ideal memory to check the one-sample-per-cycle rate. Short series check the edges, and a `start` while busy is checked to be ignored. It also counts how often each mechanism occurred (memory stalls, response backpressure, outstanding limit, full/empty input FIFO, full output FIFO, convolve stalls, window fill) and fails if one never did. It runs in under a second. |
| `tb_sg_workloads` | The 15-tap/order-4 and 10-tap/order-3 configurations end to end. It checks results against the reference, and checks that each filter reproduces a polynomial of its own order exactly. |
| `tb_sg_convolve` | The convolve unit alone. It checks the coefficients against the tabulated values, random data under random stalls, cubic-polynomial preservation, the 3-cycle latency, the full rate, saturation and series shorter than the window. |
| `tb_sg_read`, `tb_sg_write`, `tb_sg_stream_fifo` | Each unit against the memory model or a random producer/consumer: data order, addresses, counts, the outstanding-read limit and full rate. |

`tb/sg_mem_model.sv` is a behavioural model of the card memory, for simulation only. Its stall
probability and latency range can be changed while a test runs.

## Files

- `rtl/sg_pkg.sv`: shared widths and types
- `rtl/sg_kernel.sv`: top level: control and the dataflow wiring
- `rtl/sg_read.sv`, `rtl/sg_convolve.sv`, `rtl/sg_write.sv`: the three units
- `rtl/sg_stream_fifo.sv`: the FIFO stream
- `tb/`: the testbenches above, plus:
  - `sg_mem_model.sv`: the memory model
  - `sg_tb_case.sv`: one configuration run end to end
  - `sg_tb_coef.svh`: coefficient computation
