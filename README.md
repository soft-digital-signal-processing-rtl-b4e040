# Soft DSP on a self-timed datapath

A synchronous DSP datapath run below its critical supply voltage produces
*wrong* results on its long paths. A self-timed (dual-rail, return-to-spacer)
datapath behaves differently: when the supply is lowered, it gets slower but it
never produces a wrong word. If it is fed from a fixed-rate source, such as an
A/D converter, that does not wait for it, it will now and then simply *miss*
a sample. Every word that comes out is still correct. A one-bit flag that
alternates from sample to sample shows where a word is missing, and the missing
word is replaced by the average of its two neighbours. The lost samples are a
noise source whose level depends on the miss rate, so the supply voltage can be
traded against signal quality.

This repository is synthesizable SystemVerilog for that architecture. It
follows the architecture of *Soft Digital Signal Processing Using Self-Timed
Circuits*. The computation is a dual-rail 8-bit ripple-carry adder, a chain of
8 full adders: the circuit whose miss rate that work analyses. The testbenches
check every output word against an independent timing model, to the
picosecond.

## Structure

```
           clk (2x sample rate)
              |
 {ci,b,a} -> dr_encoder --bus (DATA/SPACER, +flag)--> register 1 --> st_computation --> register 2 --> y word
              (fixed rate,                          (dr_register,   (8 dual-rail FAs)   (dr_register)  |
               ignores ack)                           GUARD=1)  \________ flag bit ________/             +--> miss_detect --> interpolator
                                                          ^                                  |
                                                          +------- req1 = ack of register 2 <+     out_req <- consumer
```

| Module | Role |
|---|---|
| `dr_pkg` | dual-rail bit type `dr_bit_t {d1, d0}` and encode/decode helpers |
| `c_element` | Muller C-element, N inputs, with reset (a latch) |
| `dr_completion` | OR per bit, then a binary tree of C-elements: 1 = all DATA, 0 = all SPACER |
| `dr_register` | a C-element per rail, gated by the request; acknowledge = NOT completion |
| `dr_full_adder` | delay-insensitive full adder, eight 3-input C-element minterms |
| `st_computation` | N-bit ripple-carry chain of `dr_full_adder` (the self-timed computation) |
| `dr_encoder` | synchronous side: sample as DATA for one clock, SPACER for the next, plus the flag |
| `miss_detect` | equal flags on two consecutive outputs mean that one word was lost |
| `interpolator` | estimate of a lost word = floor((previous + next) / 2) |
| `soft_dsp_top` | everything above, wired as in the architecture |

## Dual-rail words and the handshake

Each bit travels on two wires: `(d1,d0) = (0,1)` is 0, `(1,0)` is 1, `(0,0)`
is SPACER (no value yet), and `(1,1)` never occurs. A bus alternates between a
complete DATA word and an all-SPACER word. Because a bit announces its own
arrival, the receiver knows when a word is complete, whatever the delays.

A register stores each rail in a C-element whose second input is the
*request* from the next stage. With the request high, DATA can pass; with it
low, SPACER can pass; otherwise the register holds. The completion detector
(an OR per bit, then a C-element tree) drives the acknowledge. The acknowledge
falls when all bits are DATA ("now send SPACER") and rises when all are
SPACER ("send the next DATA"). The C-elements in the tree give the acknowledge
hysteresis: a half-changed word never toggles it.

Register 1's request is register 2's acknowledge. A word is therefore let into
the datapath only once the previous word's SPACER has reached register 2, and
SPACER only once the word itself has arrived there.

The adder uses the minterm (DIMS) form. A minterm C-element fires only when all
three of its inputs hold DATA and resets only when all three are SPACER. So
every adder output waits for every input, in both directions. The adder is
therefore correct whatever its gate delays are, and the DATA wave and the
SPACER wave take the same time: N adder delays along the carry chain.

## Why samples are lost, and how often

Let `T` be the sample period, with DATA shown for `T/2` and SPACER for `T/2`.
Let `D` be the time a wave needs from register 1 to register 2. In this RTL
`D = N * FA_DELAY`, because registers and completion logic have zero delay.
A DATA wave followed by a SPACER wave must fit in one period:

    T >= D_data + D_spacer = 2D

Above the critical voltage (`D <= T/2`) the handshake always completes before
the next sample arrives, and nothing is lost. Below it, the request comes back
later each time, by `dt = D - T/2` per wave, so `2*dt` per sample. Register 1
accepts a word only while that word is on its input. When the accumulated
delay reaches a half period, a whole (DATA, SPACER) pair goes by unseen. With

    n   = floor((T/2) / dt)
    R_m = 2 / (n + 3)        (fraction of pairs lost, for D < T)

about `(n+1)/2` pairs are delivered between two losses. A loss can happen in
two ways, and the simulation shows both:

* **Request too late.** The request returns after the next word has already
  left the input. That word is lost, and the following one starts with no
  delay.
* **Word still in flight.** The previous word reaches register 2 while the
  next word is already on the input. SPACER cannot enter until the input shows
  SPACER, so the next word is lost, and the one after it starts `dt` late.

The run lengths between losses therefore alternate. With `n = 8` they
alternate between 5 and 4, which averages to exactly `(n+1)/2 = 4.5`. The
formula gives the long-run rate, not a fixed pattern. As long as `D < T`, two
consecutive samples are never lost, which is what makes one flag bit enough.

`FA_DELAY` stands for the supply voltage. The delay model
`D(V) = (C_L/beta) * V / (V - V_t)^alpha`, with `C_L/beta = 0.899e-9`,
`V_t = 0.75 V` and `alpha = 1.1967` (a 0.18 um process), gives:

| V_dd | D | FA_DELAY = D/8 |
|---|---|---|
| 1.8 V | 1526 ps | 191 ps (default) |
| 1.6 V | 1747 ps | 218 ps |
| 1.4 V | 2108 ps | 263 ps |
| 1.2 V | 2805 ps | 351 ps |
| 1.0 V | 4723 ps | 590 ps |

At the default (1.8 V) the design loses nothing up to 327 MHz. At 400 MHz
`n = 4`, and 2 pairs in 7 are lost.

## Register 1 needs a guard

The source runs at a fixed rate and never looks at the acknowledge. With the
plain register (C-element of rail and request), two situations corrupt a word:

1. A word is accepted late, and the next word arrives while the first is
   still being computed, with the request still high. The new rails set next
   to the held ones, and the changed bits become `(1,1)`.
2. The request falls while the next word is already on the input. Only the
   bits that differ drop to SPACER. Part of the adder then starts its SPACER
   wave early, and the timing starts to depend on the data.

Register 1 is therefore instantiated with `GUARD = 1`. Each rail's C-element
also takes the register's own acknowledge and an OR of all input rails. A new
word can enter only when the outputs are all SPACER, and the outputs return to
SPACER only when the whole input word is SPACER. With the guard, the RTL
matches the loss model above exactly. Register 2 is fed by a well-behaved
handshake and uses the plain form. This guard is an addition of this design;
the architecture it follows shows only the plain register.

## Miss detection and interpolation

The flag bit travels from register 1 to register 2 beside the computation,
without passing through it. `miss_detect` and `interpolator` run on the rising
edge of register 2's completion signal (`out_event`), the moment a complete
word is present.

* `miss` is high when the new word's flag equals the previous word's flag.
  It is valid at the edge. `miss_q` is its registered copy. `out_count` and
  `miss_count` count the events.
* `y` takes the new word. When `miss` is high, `y_est` takes
  `floor((previous + new) / 2)` and `est_valid` is set.

A consumer reading at `out_event` gets `y_est` (when `est_valid` is set) and
then `y`. Together they rebuild the full-rate sequence.

## Interface of `soft_dsp_top`

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst` | in | clock at twice the sample rate; asynchronous reset (all SPACER, requests high) |
| `a`, `b`, `ci` | in | sample operands, captured on the clock edge after `take` |
| `take`, `data_phase` | out | source about to capture / bus currently DATA |
| `in_ack` | out | register 1 acknowledge (the source ignores it) |
| `out_req` | in | request of the consumer of register 2 |
| `out_ack` | out | register 2 acknowledge |
| `out_event` | out | rises when an output word is complete |
| `out_bus` | out | register 2's dual-rail word {flag, sum}, to chain a further self-timed stage |
| `y`, `y_est`, `est_valid` | out | delivered sum (N+1 bits), estimate of the lost one |
| `miss`, `miss_q`, `miss_count`, `out_count` | out | miss detection |

Parameters: `N = 8` (adder width, from the 8-adder example) and
`FA_DELAY = 191` (ps per full adder).

**Consumer rule.** A consumer that takes every word at once drives `out_req`
from `out_ack`, but it must drop the request slightly *after* `out_event`
rises. The testbenches use a 1 ps delay. A zero-delay wire lets register 1 and
register 2 start their SPACER in the same instant as the output event, and
the flag is then read as SPACER.

## Simulating

All files use `timeunit 1ps`. Delays are in picoseconds and are honoured only
with `--timing`. Synthesis ignores `FA_DELAY`.

```
verilator --binary --timing -Irtl -Itb rtl/dr_pkg.sv tb/tb_st_pkg.sv \
          tb/tb_soft_dsp_top.sv --top-module tb_soft_dsp_top -o sim
./obj_dir/sim
```

Replace the testbench name for the others. Every testbench ends with
`TB_RESULT checks=N failures=M`. Expect lint warnings about circular logic:
the handshake loops and the C-element latches *are* the circuit.

| Testbench | What it checks |
|---|---|
| `tb_c_element` | random inputs against a reference state machine |
| `tb_dr_completion` | done changes only on the last bit of a DATA or SPACER wave |
| `tb_dr_register` | pass / hold / block in all handshake phases; guarded variant holds against a changing input |
| `tb_dr_full_adder` | all 8 input cases, inputs in random order; output exactly DELAY after the last input, never earlier |
| `tb_st_computation` | 300 random sums; complete at exactly 8 x FA_DELAY, and the SPACER wave likewise |
| `tb_dr_encoder` | DATA/SPACER alternation, encoding, flag sequence |
| `tb_miss_detect`, `tb_interpolator` | random streams with dropped samples |
| `tb_soft_dsp_top` | whole design at 500 MHz with D = 800, 1256, 1120, 1896 ps (no loss, n = 3, n = 8, n = 1) |
| `tb_soft_dsp_full` | whole design at default parameters, 400 MHz, 2000 samples |

The two system-level benches use `st_checker` and `tb_st_pkg`. That model
predicts, for every sample, whether it gets through and at which picosecond
its output completes. For each output word, the checker compares the
completion time, the sum, the miss flag, the estimate and both counters. It
also compares the long-run loss rate with `2/(n+3)` and reports the
interpolation error `20 lg(sigma_e / sigma_y)`. The input stream is a slow
sine plus noise, standing in for speech. Results:

| Operating point | Lost pairs | R_m measured (first to last loss) | 2/(n+3) | Error |
|---|---|---|---|---|
| D = 800 ps, 500 MHz | 0 of 400 | 0 | 0 | - |
| D = 1256 ps, 500 MHz, n = 3 | 133 of 400 | 132/396 | 1/3 | -28.4 dB |
| D = 1120 ps, 500 MHz, n = 8 | 72 of 400 | 71/390 | 2/11 | -30.5 dB |
| D = 1896 ps, 500 MHz, n = 1 | 199 of 400 | 198/396 | 1/2 | -26.2 dB |
| D = 1528 ps, 400 MHz, n = 4 (defaults) | 571 of 2000 | 570/1995 | 2/7 | -28.4 dB |

## Departures and limits

* **Computation.** The computation is the 8-bit adder chain. The real
  speech-processing function of the case study is not specified, so it is not
  built. The carry-in is an operand on the bus, not a constant, because a
  constant rail could never return to SPACER.
* **Sample width.** The architecture does not specify it. Here it is two 8-bit
  operands plus a carry in, giving a 9-bit unsigned result. The average rounds
  down.
* **Delays.** The only delays in the model are the full-adder delays. Real
  registers and completion trees add to `D`, and real DATA and SPACER delays
  differ. The model keeps them equal, as the loss analysis assumes.
* **Guard.** The register 1 guard and the consumer rule above are this design's
  additions.
* **Out of scope.** The synchronous source (A/D converter) and the terminal
  (monitor, D/A) are outside the RTL. Their signals are the top's ports. The
  same holds for power and supply voltage: `FA_DELAY` is the only stand-in
  for them.
* **Loss limit.** The flag scheme assumes `D < T`. Beyond that, two
  consecutive samples can be lost, and the detector counts them as one.
