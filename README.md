# Embedded instruments for OpenCL kernels on an FPGA

An OpenCL compiler for FPGAs turns a kernel into a deep, stall-capable
pipeline whose netlist is nearly unreadable. When such a kernel runs slower
than expected, the question is where it stalls, and for how long. The
approach here is to place small hardware **instruments** inside the kernel,
at the points the programmer cares about. In the OpenCL source each one is a
call `instrument(sel, i, var)`. Each time a work-item passes that point, the
instrument records the work-item index `i`, the value of `var` and the clock
cycle at which it happened. From these time stamps, host software computes
clock-cycle-exact latencies, initiation intervals (II) and stalls.

This repository holds synthesizable SystemVerilog for:

* the **instrument engine** (IE): a timer, the kernel-side handshake, three
  probe formats chosen by a selector, and an output buffer with a
  downstream handshake;
* the **on-chip trace memory** that stores each instrument's samples for the
  host;
* the **OpenCL pipe** (a FIFO between kernels);
* two **instrumented example kernels**: a single-kernel pipeline with four
  instruments, and the same algorithm split into three kernels joined by
  pipes, with six instruments;
* a top level, `instr_system`, that puts both examples on one device, with
  their trace memories and a host read port.

The design follows the instrumentation framework of H. Bensalem,
Y. Blaquière and Y. Savaria, "In-FPGA Instrumentation Framework for
OpenCL-Based Designs", IEEE Access 8, 2020. That article publishes the
engine's structure, port widths, probe formats, selector codes and declared
latency. It also publishes the example kernels and the latencies measured on
them. Everything else here is this design's own choice, and is listed under
"Design choices" below.

## The instrument engine

```
            ivalid/oready                                      ovalid/iready
 kernel ───────────────► ie_upstream_if ──► ie_probe_mux ──► ie_trace_buffer ───► trace memory /
 (sel, index, var)            ▲  registered      (monitor |      (FIFO, holds a        global memory
                              │  sample +        untimed |       word not taken)        (probe, 64 bit)
                        ie_monitor timer         timed)
```

`instrument_engine` chains four parts:

| part | module | what it does |
|---|---|---|
| monitor | `ie_monitor` | A 32-bit cycle counter. Reset clears it; it then counts every clock and wraps after all ones. |
| upstream interface | `ie_upstream_if` | Accepts a call when `ivalid && oready`. It registers `sel`, `index`, `var` and the timer value of that cycle. |
| probe formats + mux | `ie_probe_mux` | Builds the 64-bit probe word the selector asks for. |
| trace buffer + downstream interface | `ie_trace_buffer` | A 4-entry FIFO. It offers words on `ovalid`/`iready` and holds a word until it is taken. |

### Probe formats

| `sel` | name | probe[63:48] | probe[47:32] | probe[31:16] | probe[15:0] |
|---|---|---|---|---|---|
| 0 | monitor | 0 | stamp[31:16] | stamp[15:0] | index |
| 1 | untimed probe | 0 | 0 | var | index |
| ≥2 | timed probe | stamp[31:16] | stamp[15:0] | index | var |

The timed probe is the one used for performance analysis: it carries the
value, the work-item and the cycle. `var` is the low 16 bits of the kernel
variable and `index` the low 16 bits of the loop index. These are the
published widths. Indices therefore repeat after 65,536 work-items, and time
stamps repeat after 2^32 cycles.

### Handshake and timing

* **Upstream (kernel side).** A call is taken in a cycle where `ivalid` and
  `oready` are both high. `oready` does not depend on `ivalid`, so a kernel
  may gate `ivalid` with it. While `oready` is low, the kernel keeps the
  arguments of its call.
* **Time stamp.** The stamp is the timer value of the cycle in which the call
  was taken. It does not move if the sample later waits behind
  back-pressure.
* **Latency.** With the downstream side ready, a call taken in cycle *k*
  comes out on `probe` with `ovalid` in cycle *k*+1. This is the engine's
  declared latency of one cycle. A call can be taken every cycle. The
  trace buffer has fall-through, so it adds no cycle when it is empty.
* **Downstream side.** While `ovalid && !iready`, the same word stays on
  `probe` in the next cycle. An assertion in `ie_trace_buffer` checks this.
  If the downstream side stalls long enough, the FIFO (4 words) and the
  sample register (1 word) fill up and `oready` falls. The instrument then
  stalls the kernel rather than dropping a sample.

Each instrument has its own timer. All timers are reset together, so stamps
from different instruments share one time base and can be subtracted.

## From time stamps to performance numbers

Let `t_n(i)` be the stamp instrument *n* gives work-item *i*:

* **Initiation interval:** `II_n(i) = t_n(i+1) − t_n(i)`. A perfect pipeline
  gives 1 everywhere.
* **Latency between two points:** `L(i) = t_m(i) − t_n(i)`.
* **Stalls:** for a list of instruments, the II difference
  `δ_n(i) = II_n(i+1) − II_n(i)` is zero while nothing stalls. A non-zero
  entry shows which instrument, and so which kernel or pipe, saw a stall
  and at which work-item. An II of 1 + *g* means a stall of *g* cycles.
* **Kernel time:** `Tsk = L + II·(N − 1) + Tstalls`. Here it is measured from
  the first stamp at the kernel input to the last stamp at its output.

These computations run on the host, in software, and are not part of the
RTL. The testbenches apply the same formulas to the probe words they
receive.

## The instrumented kernels

### `sk_kernel`: single kernel, four instruments

For each work-item it computes `a = x[i]; b = y[i]; add = a + b;
mul = add * a; z[i] = mul`. The instruments are:

| instrument | samples | when (no stalls) |
|---|---|---|
| I1 | a | cycle *k*, when (x, y) is loaded |
| I2 | b | cycle *k* |
| I3 | add | cycle *k*+1 (the adder is one stage) |
| I4 | mul | cycle *k*+4 (the multiplier is `MUL_LAT` = 3 stages), when z is stored |

The kernel is a stall-enable pipeline: all stages advance together, or none
does. It advances when its last stage is empty or `z` is taken, and every
instrument is ready. A gap in the input stream, a stalled `z` output or a
full instrument therefore shows up as a larger gap between consecutive
stamps. The measured multiplication latency, I4 − I3, is exactly 3 cycles
when nothing stalls.

### `mk_system`: three kernels, three pipes, six instruments

```
 x,y ─► load_data ─(I1 a, I2 b)─► Load_A, Load_B ─► inFPGA ops ─(I3 Ain, I4 Bin, I5 Mul)─► Mul_OUT ─► store_data ─(I6)─► z
```

* The compute kernel computes `Mul = Bin * (Ain + Bin)` in one register
  stage.
* Each kernel counts its own loop index.
* Each kernel moves a work-item only when all the pipes it writes have room
  and all its instruments are ready.

With no stalls, I1/I2 → I3/I4 → I5 → I6 are one cycle apart, and every
instrument sees II = 1. In that case the II matrix is all ones and the
difference matrix all zeros. Holding `z_ready` low fills Mul_OUT, then the
two Load pipes, and then stalls the load kernel. Gaps at the input leave the
Load pipes empty and stall the compute kernel. Both kinds of stall appear
as non-zero II differences at the instruments on either side of the pipe.

Pipes (`ocl_pipe`) have no fall-through: a word written in cycle *k* can be
read in cycle *k*+1. Their default depth is 8.

## Top level: `instr_system`

The top holds both example kernels side by side. Each has its own load
(`*_in_valid/_in_ready/_x/_y`), store (`*_z_valid/_z_ready/_z`) and
selector (`*_sel`) ports.

* **Probe streams.** Every instrument's probe stream is brought out as a
  write channel towards global memory: `sk_tr_valid/_ready/_probe[3:0]` and
  `mk_tr_valid/_ready/_probe[5:0]`. A word is delivered in a cycle where its
  valid and ready are both high. The ready inputs model global-memory
  congestion.
* **Trace memories.** Each delivered word is also written into that
  instrument's **trace memory** (`trace_memory`, 512 × 64 bits). The memory
  is filled in order and wraps, so it always holds the most recent 512
  samples.
* **Host read port.** The host sets `hr_en`, `hr_kernel` (0 single,
  1 multi), `hr_inst` (instrument number − 1) and `hr_addr`. One clock later
  `hr_data` holds the entry, and `hr_count` holds the number of samples that
  instrument has written since reset.

The selector is one value per kernel, as it is a constant in the OpenCL
source. Changing it while work-items are in flight affects the instruments
those work-items have not yet reached.

Reset is asynchronous and active low everywhere (`rst_n`). Every register
is reset except the memory arrays and the trace memory's read-data register.

### Parameters

| parameter | default | where | origin |
|---|---|---|---|
| `TS_W`, `IDX_W`, `VAR_W`, `SEL_W`, `PROBE_W` | 32, 16, 16, 32, 64 | `ie_pkg` | published engine |
| `MUL_LAT` | 3 | `sk_kernel` | measured multiplication latency of the example |
| `TB_DEPTH` | 4 | `instrument_engine` | own choice |
| `TRACE_DEPTH` | 512 | `instr_system` / `trace_memory` | own choice (two 512 × 40 block RAMs per 64-bit instrument) |
| `PIPE_DEPTH` | 8 | `mk_system` / `ocl_pipe` | own choice |
| `WRAP_AT` | all ones | `ie_monitor` | published wrap of the timer |

## Design choices

The published material gives the instrument's function and port list, but
not every detail. These points are this design's own choices:

* **When the stamp is taken.** The published engine registers its inputs
  and pairs them with the timer one cycle later. Here the timer value of the
  acceptance cycle is stored with the sample. Differences between stamps are
  the same either way. This version also stays exact when a sample waits
  behind downstream back-pressure.
* **When `oready` falls.** The published engine only says that the kernel
  holds its call while `oready` is low. Here it is low only when a
  registered sample cannot move into a full trace buffer.
* **Trace buffer.** Its organisation and depth are not published. It is a
  4-deep FIFO with fall-through, so that the declared one-cycle latency
  holds.
* **Unused engine inputs.** The published port list has `startofpacket`,
  `endofpacket` and `enable` inputs that its logic does not use. They are
  omitted.
* **Example kernels.** The compiler-generated pipelines are modelled by hand:
  * a one-stage adder;
  * a global stall enable in the single kernel;
  * one register stage in the compute kernel;
  * pipe depth 8.

  The single kernel's load-to-store latency is 4 cycles: 1 for the adder and
  3 for the multiplier. The published run reports the kernel latency as the
  3-cycle multiplication latency, so `Tsk` here is one cycle longer for the
  same stalls.
* **Trace memory.** It is addressed by sample number, not by the index
  field, so it also works with the monitor format. It wraps, and reads take
  one cycle.

## Not included

* Host software (the performance analyser and the result checker).
* The host CPU and the PCIe link.
* Global DDR memory.
* The vendor interconnect and the Avalon streaming core.
* The NDRange form of the single-kernel example, and its barrier. These are
  compiler scheduling modes with no published hardware description.
* The 17 benchmark kernels used to measure area overhead.
* The resource and frequency figures of the original FPGA implementation.
  They depend on the vendor toolchain and are not reproduced.

## Simulation

Every testbench in `tb/` checks itself. It prints
`TB_RESULT checks=N failures=M` and ends with `$finish`, and it has a
watchdog. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/ie_pkg.sv tb/tb_instr_system.sv --top-module tb_instr_system
./obj_dir/Vtb_instr_system
```

| testbench | what it checks |
|---|---|
| `tb_ie_monitor` | The timer counts from reset and wraps (with a small wrap value too). The asynchronous reset works. |
| `tb_ie_probe_mux` | All three formats, with random samples, against words built bit by bit. |
| `tb_ie_upstream_if` | `oready`, the registered arguments and the acceptance stamp, against a reference model. Random traffic. |
| `tb_ie_trace_buffer` | Order, fill level, fall-through and hold, against a queue model. |
| `tb_instrument_engine` | Every probe word against the call and the testbench's own cycle count. Latency 1 and one call per cycle without back-pressure; no loss with back-pressure. |
| `tb_trace_memory` | Entries, sample count and wrap after more than 512 samples. |
| `tb_ocl_pipe` | Order, full and empty, against a queue model. |
| `tb_sk_kernel` | `z`, each probe's index, value and stamp. II = 1, adder latency 1 and multiplier latency 3 without stalls. Input gaps, `z` stalls and trace stalls. |
| `tb_mk_system` | `z`, probe words, stamps, an II matrix of ones and unit latencies without stalls. Pipe-full, pipe-empty, `z` and trace stalls all occur and show in the II differences. |
| `tb_instr_system` | End to end at default sizes, 50,000 work-items per example (details below). |
| `tb_workload_sizes` | The single kernel on 1,250, 10,000, 25,000, 1,000,000 and 10,000,000 work-items (5 KB to 40 MB of input). Checks every result and every I1/I4 probe, and `Tsk = 4 + (N − 1)`. |

`tb_instr_system` is the end-to-end test, at the default sizes:

* The single kernel runs 50,000 work-items. Eight input gaps of 94 to 286
  cycles are injected, 1,258 cycles in all. I4 must report exactly those
  eight stalls, and `Tsk = 4 + 49,999 + 1,258 = 51,261` cycles.
* The selector is then switched to the monitor format, then to the untimed
  format.
* The multikernel example runs 50,000 work-items, with pipe-full,
  pipe-empty, `z` and trace back-pressure.
* The host port then reads back all ten trace memories, which have wrapped.
* Each of these mechanisms is counted, and must occur at least once.

It runs in a few seconds. `tb_workload_sizes` runs about 11 million cycles
in about 10 s.

Three testbenches set parameters of their block:

* `tb_ie_monitor` sets a small wrap value, to reach the wrap.
* `tb_ie_trace_buffer` and `tb_ocl_pipe` set the depths explicitly, at their
  default values.

## How far to trust it

* All modules pass Verilator lint and a Yosys/slang elaboration, and
  synthesize without latches or combinational loops.
* Each block's testbench was also run against a deliberately broken copy of
  the block, and failed.
* The instrument engine follows its published description closely; the
  choices above are where it departs from it.
* The two kernels are behavioural stand-ins for compiler-generated
  pipelines. Their stall behaviour is plausible, but it is not the vendor
  compiler's. The measured latencies match the published ones (multiply 3,
  compute kernel 1, II 1 without stalls).
