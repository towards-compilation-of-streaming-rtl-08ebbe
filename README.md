# Streaming kernels in hardware: autocorrelation and FIR pipelines

This RTL implements streaming programs as hardware. A streaming program is
a set of *kernels*, which do the computation, joined by *streams*, which
carry the data. The elements of a stream are independent of each other. A
kernel applies its operation to every element of its input streams. Here
each kernel is its own hardware unit and each stream is a small on-chip
FIFO. All kernels therefore run at the same time, as stages of one pipeline
(task parallelism). Because the elements are independent, a slow kernel can
also be *replicated*: copies of it work on alternate elements (data
parallelism).

Two applications are built this way, and they sit side by side in the top
module `stream_top`:

* **Autocorrelation**: `R[d] = sum_n x[n] * x[n+d]` of a 100,000-sample
  signal, for 8 shift distances `d = 0..7`.
* **FIR filter**: `y[n] = sum_k h[k] * x[n-k]` with 8 taps, over a
  100,000-sample signal.

All data are 32-bit integers, and arithmetic wraps modulo 2^32 like C `int`
arithmetic on two's-complement hardware. The input signals are made on chip
by source kernels, so the pipelines never wait for memory to deliver input.
The results go to system memory through a simple write port.

## The autocorrelation pipeline

```
 create1 --[stream1 FIFO]--\
                            mul --[mul_result FIFO]-- sum --[reduce_result FIFO]-- write --> memory
 create2 --[stream2 FIFO]--/
```

* `create1` streams the signal `x[n] = n` once for every shift distance:
  8 x 100,000 elements, with the shift as the outer loop.
* `create2` streams the shifted signal `x[n+d] = n + d` in the same order.
* `mul` multiplies matching elements.
* `sum` is a *reduction* kernel: it adds each run of 100,000 products into
  one element. The 800,000 products become 8 results.
* `write` stores `R[0..7]` at 8 consecutive words.

Each kernel takes one element per clock cycle. A full run therefore takes
800,000 cycles plus about 8 cycles to fill and drain the pipeline.

## The FIR pipeline

```
 create1 --[FIFO]-- window --[FIFO]--\
                                      mul --[FIFO]-- sum(8) --[FIFO]-- write --> memory
 create2 (coefficients) --[FIFO]-----/
```

The filter needs the 8 newest samples at every step. `fir_window_kernel`
keeps them in a shift register. The register is built as an 8-entry
circular buffer: a write pointer moves and the data stay where they are.

For each new sample `x[n]`, the window kernel sends the window `x[n],
x[n-1], ..., x[n-7]` as 8 stream elements, newest first. Samples from
before the start of the signal count as 0. `create2` sends the matching
coefficients `h[0..7] = 1..8` once per output. `mul` forms the 8 products.
`sum`, with a run length of 8, adds them into `y[n]`. The split into a
window kernel, `mul` and `sum` is a choice of this design: it reuses the
same `mul` and `sum` kernels as the autocorrelation.

The window kernel sends one element per cycle. A run of 100,000 outputs
therefore takes 800,000 cycles plus about 10.

## Replication (the part that needs care)

`LANES_AC` and `LANES_FIR` set how many copies of `mul` and `sum` each
application has. The values 1, 2 and 4 are the ones evaluated; 1 is the
default. Each copy (a *branch*) has its own FIFOs. The catch is that a
stream must be dealt out to the branches and the branch results joined
again, and the right way to do that depends on the kernel.

**Dealing elements round-robin (autocorrelation).** Each `create` kernel
has one output port per branch. It sends element `n` of each shift to
branch `n mod LANES`, so each branch multiplies a fixed share of the
pairs. Each port has its own loop counters, so the source delivers `LANES`
elements per cycle and never holds the branches back.

The reduction is then split as well. Each `sum` copy adds only `N/LANES`
products and holds a *partial* sum of `R[d]`. The write kernel is set to
`WR_SUM`: it waits until every branch has its partial sum for shift `d`,
adds them, and stores the total. A run with 4 branches takes 200,000
cycles instead of 800,000. `N` must be a multiple of `LANES`.

**Dealing whole windows round-robin (FIR).** Here an output needs all 8
elements of its window in one branch, so the window kernel sends whole
windows: window `n` goes to branch `n mod LANES`. `create2` deals whole
coefficient sets the same way (`SPLIT_OUTER = 1`). The write kernel is set
to `WR_MERGE`: it reads the branches in the same round-robin order, so
`y[n]` is stored in order.

**Why the FIR does not speed up here.** The shift register cannot be
split: every window needs the newest 8 samples. So there is only one window
kernel, and it emits every element of every window. In this RTL that kernel
sends one element per cycle, so the filter stays at one output per 8
cycles whatever `LANES_FIR` is. The replicated branches compute correctly
but wait on the window kernel.

In the original system the kernels were made by a C-to-hardware compiler
and were slower. There, two branches doubled the filter's throughput, and
four branches fell well short of four times, because the shift register
became the bottleneck. This RTL shows the same limit, but it is reached at
once.

## Streams and FIFOs

Every stream uses a valid/ready handshake. An element moves on a rising
clock edge when `valid` and `ready` are both high. A producer that offers
an element keeps offering that same element until it is taken;
`stream_fifo` and `write_kernel` check this rule with assertions.

`stream_fifo` is four elements deep. Its head element is visible whenever
`out_valid` is high. `in_ready` means "not full". An element pushed in one
cycle can be popped in the next. With producer and consumer both always
ready, a FIFO passes one element per cycle.

The FIFOs are there because the kernels do not all take the same time per
element. A consumer can keep working from the FIFO while its producer is
busy, and a producer can run ahead while its consumer waits.

## Kernels

| module | role | timing |
|---|---|---|
| `create_kernel` | source: element `(outer, inner)` = `START + inner*INNER_STEP + outer*OUTER_STEP`, dealt to `LANES` ports, per element or per inner loop | 1 element per lane per cycle, from the cycle after `start` |
| `mul_kernel` | `c = a * b`, low 32 bits | 1 per cycle; result 1 cycle after its operands are taken |
| `sum_kernel` | adds runs of `GROUP` elements; the first element of a run loads the sum | 1 input per cycle; the sum appears 1 cycle after the run's last element |
| `fir_window_kernel` | circular-buffer shift register that sends windows | 1 element per cycle; a new sample every `TAPS` cycles |
| `write_kernel` | stores words at `BASE + 4*i`; `WR_MERGE` or `WR_SUM` across lanes | 1 word per cycle unless the memory stalls |
| `stream_ctrl` | start pulse, busy/finished flags, cycle count | see below |

Every kernel with loop state (`create`, `sum`, `window`, `write`) reloads
that state on the one-cycle `kernel_go` pulse from `stream_ctrl`. A second
run therefore starts clean, without a reset.

## Control and the memory port

`stream_ctrl` takes a processor's place. A `start` request moves it IDLE →
GO → RUN. In GO it sends `kernel_go` to every kernel for one cycle. It
stays in RUN until the write kernel has stored its last word and both
sources have finished. It then sets `finished`. `cycles` holds the run's
length, counted from the GO cycle to the last RUN cycle. A `start` request
during a run is ignored.

Each application has its own write-only memory master, in the style of
Avalon-MM:

* `mem_write`, `mem_address` (byte address, words 4 bytes apart) and
  `mem_writedata` are outputs.
* `mem_waitrequest` is an input; the memory holds it high to stall.
* A write completes in the first cycle where `mem_write` is high and
  `mem_waitrequest` is low. The request does not change while it is
  stalled.

The autocorrelation writes from `AC_BASE` (default 0) and the filter from
`FIR_BASE` (default 0x100000). The memory itself, its controller and any
processor that reads the results are outside this RTL.

## Parameters of `stream_top`

| parameter | default | meaning |
|---|---|---|
| `N_AC` | 100000 | autocorrelation signal length (must be a multiple of `LANES_AC`) |
| `NSHIFT` | 8 | number of shift distances, `d = 0..NSHIFT-1` |
| `LANES_AC` | 1 | branches for autocorrelation `mul`/`sum` (1, 2, 4 evaluated) |
| `N_FIR` | 100000 | FIR signal length |
| `TAPS` | 8 | filter taps |
| `LANES_FIR` | 1 | branches for FIR `mul`/`sum` |
| `AC_BASE`, `FIR_BASE` | 0, 0x100000 | result byte addresses |

`stream_pkg` holds the element width (32), the FIFO depth (4) and the
write-mode enum.

## What follows the original design and what does not

These parts follow the original design:

* the kernel/FIFO structure
* the names and order of the autocorrelation pipeline (`create1`,
  `create2` → `mul` → `sum` → `write`, with FIFOs `stream1`, `stream2`,
  `mul_result` and `reduce_result`)
* the `c = a*b` and `r = r + a` kernels, with the reduction loading its
  first element
* 32-bit samples and FIFOs of depth 4
* 100,000 samples, 8 shifts and 8 taps
* round-robin dealing to replicated kernels
* the circular-buffer shift register of the FIR
* replacing the processor's start-up role with a small state machine

These are this design's own choices:

* the valid/ready handshake and all cycle timing (the original kernels
  came from a C-to-hardware compiler, whose cycle behaviour is not
  reproduced)
* the test signal `x[n] = n`, the coefficients `h[k] = k+1`, and zero
  history at the start of the filter
* the order of the autocorrelation streams (shift outer, sample inner)
* joining partial sums in the write kernel
* the FIR's split into window, `mul` and `sum` kernels, with whole-window
  dealing
* the memory port and the address map
* synchronous active-low reset

Measured throughput and area figures of the original FPGA system are not
reproduced. As explained above, the replicated FIR does not gain speed in
this RTL.

## Simulating

Every testbench checks itself and ends by printing `TB_RESULT checks=N
failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/stream_pkg.sv tb/tb_stream_top.sv --top-module tb_stream_top -o sim
./obj_dir/sim
```

| testbench | what it covers |
|---|---|
| `tb_stream_top` | both applications at once: 96-sample autocorrelation and 48-sample FIR, 2 branches each, memory stalling ~30% of cycles, two runs. Counts and requires each of: full FIFO back-pressure, memory stalls, work on second branches, partial-sum joining, window dealing, zero-filled windows, a second run |
| `tb_stream_top_full` | default parameters, one complete run of both applications: all 8 `R[d]` and 100,000 `y[n]` checked, each run 800,000 cycles + at most 32 (under 2 s of simulation) |
| `tb_stream_top_replicated` | default sizes with 2 and 4 branches in both applications: all results checked; autocorrelation in 400,008 and 200,008 cycles, FIR still 800,010 |
| `tb_autocor_system` | autocorrelation with 1 and 4 branches, with and without stalls; checks the 4x speed-up |
| `tb_fir_system` | FIR with 1, 2 and 4 branches; checks results and the window-kernel bound |
| `tb_stream_fifo`, `tb_create_kernel`, `tb_mul_kernel`, `tb_sum_kernel`, `tb_fir_window_kernel`, `tb_write_kernel`, `tb_stream_ctrl` | each kernel alone, against reference models, with random handshakes and rate checks |

`tb/sysmem_model.sv` is a behavioural stand-in for the system memory. It
can stall at random (`STALL_PCT`), and testbenches read back what was
written.
