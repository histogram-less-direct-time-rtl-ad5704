# Histogram-less direct time-of-flight ranging with an LSTM processor

A direct time-of-flight (dTOF) rangefinder fires a laser pulse, timestamps
the photons a SPAD detects, and finds the distance from when the returned
pulse arrives. The usual way is time-correlated single-photon counting:
build a histogram of many timestamps, then find its peak. The histogram
needs a lot of memory, and most of it holds background counts.

This design builds no histogram. Each photon timestamp goes, in arrival
order, into a small recurrent neural network (an LSTM). After a fixed
number of photons (512, one "depth-dot"), the network outputs the phase of
the returned pulse directly, as a fraction of the full-scale range. The
only storage is the 512 timestamps themselves and 42 rows of weights.

The RTL has three parts:

* a tapped-delay-line **TDC** for an FPGA, sampling at 400 MHz;
* the **event memory** plus a **system state machine** that the host drives;
* an **LSTM accelerator**: eight processing elements (PEs) under a program
  counter, with a weight memory loaded by a small DMA.

```
 spad_hit ─► tdl_chain ─► tdl_sampler ─► t2b_encoder ─► timestamp ─► cdc_sync ─┐
            (delay line)  (2 FF ranks)   (ones count)   (coarse,fine) 400→100MHz │
                                           coarse counter ─► laser_trig         │
                                                                               ▼
 host_start ─► host_fsm ── writes ──► event_memory (512 x 32) ──► lstm_accel ─► depth
 host_done  ◄─     └──── accel_start (memory full) ──────────────►   ▲  │
 dma stream ─► weight_dma ─► weight_memory (42 x 128) ───────────────┘  └► accel_sleep
```

## Data flow for one depth-dot

1. The host pulses `host_start`. `host_fsm` enters ACQUIRE. The accelerator
   stays asleep, with its PE clock enables off.
2. Each SPAD pulse gets a timestamp: TDL bins since the last laser trigger,
   `0 .. 4999`. The timestamp is written to the next event-memory address.
   Timestamps that arrive while the system is not acquiring are discarded.
3. After 512 timestamps, `accel_start` pulses and the accelerator runs the
   LSTM over them, in the order they arrived.
4. `depth` (Q6.10, 0..1 of the range) becomes valid. `host_done` pulses for
   one cycle, and the system returns to IDLE. The host computes the distance
   as depth × FSR.

The `ts_store`/`ts_addr`/`ts_data` outputs copy every stored timestamp.
With them, the host can run a conventional histogram estimate (for example,
centre of mass) on the same data, for comparison.

## TDC: timestamps in 20 ps bins

* **Delay line** (`tdl_chain`). On the FPGA this is a chain of Carry4 cells.
  It is a placed primitive whose behaviour comes from its delays, so
  `tdl_chain` is a behavioural model with transport delays and does not
  synthesize. It has 128 taps of 20 ps each. Tap *k* rises (k+1)·20 ps
  after the pulse.
* **Double sampling** (`tdl_sampler`). Two register ranks at 400 MHz. The
  first stands for the flip-flops in the carry slices; the second gives a
  metastable bit a full period to settle.
* **T2B encoder** (`t2b_encoder`). A two-stage ones counter: popcounts of
  16-bit groups, then their sum. A ones counter tolerates bubbles in the
  thermometer code. The encoder flags a hit only in the sample where tap 0
  has just risen, which is the sample that caught the edge in flight.
  `fine` is the number of taps the edge passed before the clock edge.
* **Coarse counter** (in `tdc`). Counts 0..39 at 400 MHz, so one laser
  period is 100 ns, which is 15 m. `laser_trig` rises when the counter
  wraps to 0. The counter value travels through a 4-stage pipeline that
  matches the sampler and encoder latency. With `v` the counter value of
  the edge that caught the hit:

  `ts = v·125 − fine  (mod 5000)`

  125 = `BINS_PER_CLK`, the delay-line calibration (bins per 2.5 ns). In a
  real device it must be measured. A hit just before a laser edge gives a
  negative value, which wraps to the end of the period. The result is
  ts = ⌈(t_hit − t_laser)/20 ps⌉.
* **Clock crossing** (`cdc_sync`). A toggle request/acknowledge handshake
  with two-flop synchronizers on both sides. A transfer takes under 40 ns,
  less than a SPAD dead time. A hit that arrives during a transfer is
  dropped, and the top-level `dropped` counter counts it. This is a design
  choice; a FIFO would avoid the loss at the cost of area.

## LSTM on eight processing elements

The network: a scalar input x_t (the timestamp scaled to the range), a
hidden size of 8, and one fully connected output:

```
f = σ(W_xf x + W_hf h + b_f)    i = σ(W_xi x + W_hi h + b_i)
c~ = tanh(W_xc x + W_hc h + b_c) o = σ(W_xo x + W_ho h + b_o)
c = f⊙c + i⊙c~                  h = o⊙tanh(c)
y = w_fc · h + b_fc              (after the last timestamp)
```

Hidden size 8 and scalar input are not free choices. They follow from the
weight memory: 42 rows of 8 × 16 bits. That is 4 gates × (bias, W_x, 8
columns of W_h) = 40 rows, plus a row of FCN weights and a row holding the
FCN bias.

**Row-stationary mapping.** PE *k* owns row *k* of every matrix, and element
*k* of every vector. Each weight-memory row holds one 16-bit word per PE
(lane *k* = bits 16k+15:16k), so one read feeds all eight PEs. For W_h·h,
the hidden memory broadcasts one element h[j] per cycle. In that cycle
every PE multiplies it by its own W_h[k][j].

**The PE** (`pe`) has one 16×16 multiplier, one 28-bit adder and one
activation table. A multiplexer sits in front of each, so the same operators
serve the multiply-accumulates, the element-wise products and the
activations. Each PE has ten 28-bit activation registers in two banks of
five (`activation_regs`). The banks have separate read ports, so a product
such as f⊙c reads both operands in one cycle. Register map:

| bank A | bank B |
|---|---|
| 0: f, 1: i, 2: o, 4: own h | 0: c~, 1: c, 2: tanh(c) |

**Number formats.** Weights, x and h are Q6.10 (16 bits, 10 fraction bits).
Accumulators and registers are 28 bits with 10 fraction bits. A product is
truncated back to 10 fraction bits before it is added. Register values used
as multiplier operands are saturated to 16 bits. h is saturated to Q6.10.
The accumulator does not saturate: 28 bits leave 18 integer bits of
headroom.

**Activation table** (`activation_lut`). One 256-entry tanh table covers
[−4, 4) in steps of 1/32. The argument is truncated, and values outside the
range clamp. The sigmoid uses the same table: σ(x) = (1 + tanh(x/2))/2.
The table is computed at elaboration by `dtof_pkg::tanh_table()`, with
entry k = round(1024·tanh((k−128)/32)). Against the exact functions, the
error is at most one table step plus one LSB.

**Program** (`lstm_controller`). The program counter is
{phase, gate[1:0], step[3:0]}. In phase 0, the weight row is
10·gate + step (the step bits are masked to the row inside the gate's block).
Each timestamp takes 50 cycles:

| cycles | operation (all PEs at once) |
|---|---|
| 4 × 11 | per gate: `acc=b`; `acc+=W_x·x`; 8 × `acc+=W_h[k][j]·h[j]`; `reg=σ(acc)` (tanh for c~) |
| 1 | `acc = f·c` |
| 1 | `acc += i·c~` |
| 1 | `c = acc` |
| 1 | `tc = tanh(c)` |
| 1 | `acc = o·tc` |
| 1 | `h = sat(acc)`: written to the hidden memory and to the PE's register A4 |

Before the first timestamp, a clear cycle sets c₀ = h₀ = 0. After the last
timestamp, every PE forms w_fc[k]·h[k] (row 40). Then `fcn_reduce` adds the
eight products and the bias (row 41, lane 0) in an adder tree and registers
y. The micro-op goes through one pipeline register, so it meets the
block-RAM read data in the same cycle.

**Timing.** From `start` to `done`, the accelerator takes 3 + 50·N + 2
cycles (N = 512: 25,605 cycles, 256 µs at 100 MHz). Its PEs are enabled for
50·N + 4 of them. Scaling the input to the range costs no cycles:
x = (ts·13422) >> 16 = ts/5000 in Q6.10.

## Weights

`weight_dma` takes 32-bit words on a valid/ready stream. Four words make
one row, lowest lanes first: word j carries PE lanes 2j (low half) and 2j+1
(high half). Rows are written in order 0..41, and `dma_restart` starts over.
`weight_memory` can also be preloaded from a hex file through its
`INIT_FILE` parameter, one 128-bit row per line. No trained weights come
with the design. The testbenches use random weights and check the arithmetic
bit-exactly against a reference model. The distance estimates they print
therefore mean nothing physically.

## Parameters

| parameter | default | where |
|---|---|---|
| `N_EVENTS` / `EVENTS` | 512 | timestamps per depth-dot, event-memory depth |
| `NPE`, `WROWS`, `WROW_W` | 8, 42, 128 | `dtof_pkg` (changing them changes the network layout) |
| `TAPS`, `TAP_NS` | 128, 0.020 | delay line |
| `BINS_PER_CLK` | 125 | delay-line calibration |
| `LASER_PERIOD_CLK` | 40 | laser period in 400 MHz cycles (15 m range) |
| `XMUL`, `XSHIFT` | 13422, 16 | input scaling, XMUL = 2^XSHIFT·1024 / (LASER_PERIOD_CLK·BINS_PER_CLK) |

If you change the laser period or the calibration, change `XMUL` with them.

## Where this design departs from, or adds to, the original description

These are the design's own choices:

* Delay-line length and tap delay.
* Coarse counter, laser trigger and timestamp format.
* Bubble-tolerant ones counter and hit detection.
* Toggle-handshake crossing that drops hits.
* PE operation set, register map, 50-cycle schedule and table size.
* FCN adder tree outside the PEs.
* DMA word packing.
* State-machine encoding.

Sleep mode is a clock enable on the PEs, not a gated clock.

The original used a vendor block RAM for the weights and noted that a
single-port SRAM could replace it later. Here it is a simple dual-port array
with a synchronous read.

The 28-bit registers hold the activation outputs sign-extended, and c at
full accumulator width.

The host link (a USB interface with its host program) and the clock
generator are vendor parts and are not included. The 400 and 100 MHz
clocks are inputs and must be phase-aligned. The SPAD is an analog sensor;
its pulse is the input `spad_hit`.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. The testbenches compare against values
computed independently in the testbench:

* `tb_activation_lut` checks against `$tanh` and `$exp`.
* `tb_lstm_accel` and `tb_dtof_top` check against `lstm_ref_pkg`. That
  package computes the LSTM equations on whole vectors and knows nothing of
  the PE schedule.
* `tb_tdc` and `tb_dtof_top` check each timestamp against the real pulse
  time.

`tb_dtof_top` runs the whole system at its default size: two depth-dots of
512 photons, with weights reloaded through the DMA in between. It counts,
and requires, each mechanism:

* hits ignored while idle;
* hits dropped in the crossing;
* wrapped coarse periods;
* accelerator sleep and wake-up;
* weight reloads.

It takes a few seconds. `tb_ranging_sweep` does the same with one set of
weights for twelve points, spread from 0.05 m to 15 m, at rising signal
levels. It takes about half a minute.

To run the top-level testbench with Verilator:

```
verilator --binary --timing -Wno-fatal --top-module tb_dtof_top \
  -y rtl -y tb +libext+.sv rtl/dtof_pkg.sv tb/lstm_ref_pkg.sv tb/tb_dtof_top.sv
./obj_dir/Vtb_dtof_top
```

Other testbenches run the same way; only the module name changes. Every
file has `` `timescale 1ns/1ps ``.
