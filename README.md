# DPAA: a dynamically programmable arithmetic array on a CDMA bus

The DPAA is an array of small fixed-function arithmetic blocks for signal processing. It has
16-bit adders, subtractors, multipliers, shifters and delay blocks. They are wired together by
one shared bus and no switch matrix. Every block sends its result on the bus spread by its own
pseudo-noise (PN) code. Every block input listens to the bus through a receiver that correlates
with one chosen code. Connecting input X to block Y therefore means writing Y's code into X's
receiver. That is the whole program of the array. Any block can reach any other, one result can
be taken by many inputs at once, and the program can be rewritten while data flows. The change
takes effect cleanly at the next bit boundary.

This repository holds synthesizable SystemVerilog for the prototype configuration of the
architecture:

| blocks | count |
|---|---|
| adders (with overflow) | 16 |
| multipliers (with overflow) | 10 |
| shifters (with overflow) | 8 |
| subtractors | 8 |
| delay blocks | 8 |
| data inputs / data outputs | 4 / 4 |
| transmitters / receivers on the bus | 54 / 96 |

The analog bus of the original chip carries each transmitter as a small charge-pump voltage step.
Here it is modelled at logic level as an exact sum, so the design simulates and synthesizes as
ordinary digital logic.

## How a connection is made: code-division on one bus

**Codes.** Every bus interface has a 7-bit LFSR (`pn_code_gen`). Stage 1 takes stage 3 XOR
stage 7, and every other stage takes its left neighbour. This is a maximal-length register, so
any nonzero 7-bit start state produces one phase of the same 127-chip m-sequence. The start state
is the *setup information* (the "code"). Transmitter `t` has the fixed code `t+1`, held as a
constant (ROM). Each receiver's code sits in a setup cache that is loaded serially.

**Modulation.** During one system clock a transmitter (`bus_tx`) sends one data bit `d` as 127
chips, each `d XOR chip`. The bus (`ma_bus`) reads chip 0 as +1 and chip 1 as -1 and adds all
54 transmitters: `bus = N - 2*ones`, a 7-bit signed value.

**Demodulation.** A receiver (`bus_rx`) runs its own LFSR from its cached code, in lock-step with
all transmitters. Every LFSR is reloaded in the same slot. In each chip slot it multiplies the bus
value by its own ±1 chip (the mixer) and accumulates the product (the low-pass filter, an
integrate-and-dump over 127 chips). For two phases of an m-sequence the correlation is exactly -1,
and for the same phase it is 127. So with `N` transmitters on the bus:

* matched code: `sum = ±127 + (at most N-1 units of cross-talk)`, so `|sum| >= 127-(N-1)`;
* no match: `|sum| <= N`.

The level detector gives `data = (sum <= -64)` and `VALID = (|sum| >= 64)`. With 54 transmitters
the worst matched magnitude is 74 and the worst unmatched is 54, so the decision is exact. The
margin holds up to 63 concurrent transmitters. When VALID is low the receiver delivers 0.

**Code 0 is "unconnected".** The all-zero LFSR state never moves. A receiver holding code 0
matches nothing and reads the constant 0. The programming tricks below rely on this.

## Timing: slots, system clocks and word periods

The array runs on one clock, the bus interface clock `clk`. `dpaa_timing` divides it as follows:

```
system clock = 128 clk:  slot 0 = t1 (reload)  | slots 1..127 = t2 (one chip each)
word period  = 16 system clocks = 2048 clk     (16-bit words, LSB first, 1 bit per system clock)
```

* In **t1** every LFSR loads its code. Every block takes the bit its receivers decided on the
  previous system clock and moves its serial output to the next bit. A receiver decides at the
  end of slot 127 and holds `data`/`VALID` through the following system clock.
* A bit sent during system clock `k` is therefore consumed in the t1 slot of system clock `k+1`.
  Bit 15 of a word arrives in the t1 slot of bit 0 of the next word period. That slot is
  `word_tick`.
* **Every element has a latency of exactly one word period.** At `word_tick` it has both complete
  operand words from period `n`. It computes the result as a word and sends it bit-serially
  during period `n+1` (`le_deser` → function → `le_ser`). Because all elements have the same
  latency, a program balances its paths by counting elements, as with delay blocks.

At a 200 MHz interface clock one block does 200e6/2048 = 97.7 k operations/s. Over the 58 bus
clients (50 elements and 8 I/O ports) that is 5.66 MOPS, the throughput of the original prototype.

## The logic elements

All are 16-bit two's complement. Operand `a` is receiver 0 and operand `b` is receiver 1.

| module | result | overflow |
|---|---|---|
| `le_add` | `a + b`, wraps | `ovf` when the signed sum does not fit |
| `le_sub` | `a - b`, wraps | none |
| `le_mul` | `(a*b) >>> FRAC`, cut to 16 bits; `FRAC = 8` (1.0 = 256) | `ovf` when the cut loses bits |
| `le_shift` | `a` shifted by the signed 5-bit amount in `b[4:0]`: 0..15 left, -1..-16 arithmetic right | `ovf` on a lossy left shift |
| `le_delay` | `a` (one word period later) | none |
| `io_in_port` | sends the pin word sampled at `word_tick` | |
| `io_out_port` | shows the received word at `word_tick`; `valid` = VALID on all 16 bits | |

An `ovf` flag belongs to the result word being sent and holds for that word period.

Elements can act as other functions:

* An adder or subtractor with one operand unconnected is a one-word delay. A multiplier by 1.0
  (256) is also a one-word delay.
* An adder whose `a` listens to its own output and whose `b` is unconnected is a **register**: it
  holds its value forever. Point `b` at a source for one word period and it accumulates; point
  `a` away as well and it loads. The same works for a delay block listening to itself.
* Constants come from the input ports.

## Programming the array

**Numbering.**

* Transmitters (code = number + 1): inputs 0-3, adders 4-19, multipliers 20-29, shifters 30-37,
  subtractors 38-45, delays 46-53.
* Receivers: adder `i` operands `a`,`b` = `2i`, `2i+1` (0-31), multipliers 32-51, shifters 52-67,
  subtractors 68-83, delays 84-91, output ports 92-95.

**Loading.** All 96 setup caches form one shift chain.

1. Hold `cfg_shift` high for 672 clocks and present the codes on `cfg_sdi`, least significant bit
   first: bit `j` of receiver `k` is shift number `7k+j`. The first bit shifted in ends in
   receiver 0. `cfg_sdo` is the end of the chain.
2. Pulse `cfg_commit` for one clock. This copies all shadow registers into the active codes.
3. The LFSRs read the active codes only in t1, so a commit takes effect at the next system clock
   and never splits a bit.
4. To switch programs exactly at a word boundary, shift during a word period and commit after
   slot 0 of its bit 15.

A program can be changed every word period: the shift takes 672 of the 2048 clocks.

**The sequencer.** The chain has two drivers, selected by `seq_en`:

* With `seq_en` low, the `cfg_*` pins drive it as described above. This is how the prototype chip
  was programmed, from outside.
* With `seq_en` high, the built-in sequencer (`dpaa_sequencer`) drives it. The sequencer holds
  up to 32 programs, written one code at a time through `seq_wr_en`, `seq_wr_prog`, `seq_wr_rx`
  and `seq_wr_code`.

While `seq_run` is high, the sequencer picks one program at every `word_tick`. The first pick of
a run is `seq_start`. After that it counts up, wrapping at 32, and after `seq_last` it returns to
`seq_first`. The picked program is shifted out during that word period and committed in its
bit 15, so it applies from the next word period. `seq_prog` shows the program being loaded. An
algorithm that needs a different configuration in every cycle therefore runs with no host
involvement. Put its set-up programs from `seq_start` onward and its repeating schedule in
`seq_first..seq_last`.

**Example: the complex FIR output of a CMA adaptive array** (`OUT = Σ h_k c_k`, two taps per
pass), as run by `tb/tb_dpaa_top.sv`:

```
delay0..3 = hr1..hr4  (delay0.a <- in0, delay k.a <- delay k-1)   same for hi1..hi4 (delays 4..7, in1)
add0..3   = cr1 ci1 cr2 ci2   (a <- itself, b <- in2/in3 for one word period to load)
mul0 = hr1*cr1  mul1 = hr1*ci1  mul2 = hi1*cr1  mul3 = hi1*ci1   (tap 2 on mul4..7)
sub0 = mul0 - mul3 (or1)   add4 = mul1 + mul2 (oi1)   sub1/add5 for tap 2
add6 = sub0 + sub1 (totalr)  add7 = add4 + add5 (totali)
add8 = add6 + add8 (outr, accumulates)  add9 = add7 + add9 (outi)
out0 <- add8, out1 <- add9
```

`tb/tb_cma_adaptive.sv` runs the whole 4-tap CMA algorithm:

* `OUT = Hᵀ C`
* `e' = OUT (1 - |OUT|²)`
* `C += μ e' H*` with `μ = 2⁻⁴`

It uses a schedule of 16 programs per sample, one per word period. The sequencer replays them
from its memory (slot 0 loads c1 = 1.0, slots 1-16 are the frame). The delay blocks hold the tap
values, adders 0-7 hold the weights, multipliers are reused for the second pair of taps, and
shifters apply μ. The header of that file lists the schedule.

## Top-level interface (`dpaa_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | interface clock; asynchronous active-low reset (all codes 0 = everything unconnected) |
| `in_word` | in | 4×16 | input port words, sampled at `word_tick` |
| `out_word`, `out_valid` | out | 4×16, 4 | output port words of the last word period, and their valid flags |
| `sys_tick`, `word_tick`, `bit_idx`, `slot` | out | 1, 1, 4, 7 | timing: t1 slot, word boundary, bit and slot number |
| `cfg_shift`, `cfg_sdi`, `cfg_commit` | in | 1 | serial configuration bus |
| `cfg_sdo` | out | 1 | end of the configuration chain |
| `seq_en` | in | 1 | the sequencer drives the chain instead of the `cfg_*` pins |
| `seq_wr_en`, `seq_wr_prog`, `seq_wr_rx`, `seq_wr_code` | in | 1, 5, 7, 7 | write one receiver code of one program into the sequencer |
| `seq_run`, `seq_start`, `seq_first`, `seq_last` | in | 1, 5, 5, 5 | run control of the sequencer |
| `seq_prog` | out | 5 | program the sequencer is loading |
| `ovf_add`, `ovf_mul`, `ovf_shift` | out | 16, 10, 8 | overflow flags |
| `rx_valid` | out | 96 | VALID of every receiver |

Parameters: `N_IN, N_OUT, N_ADD, N_MUL, N_SHIFT, N_SUB, N_DELAY` (defaults 4, 4, 16, 10, 8, 8, 8)
`FRAC` (8) and `SEQ_DEPTH` (32 programs). The word width (16) and the code length (127, 7-bit LFSR) are in `dpaa_pkg`.

Module hierarchy:

* `dpaa_top`
  * `dpaa_timing`
  * `dpaa_sequencer`
  * `ma_bus`
  * per element or port: `bus_interface`
    * `bus_tx` → `pn_code_gen`
    * `setup_cache`
    * `bus_rx` → `pn_code_gen`
  * the element (`le_*`, `io_in_port`, `io_out_port`), built from `le_deser` and `le_ser`

## What follows the original architecture, and what is this design's own

Taken from the original description:

* the element mix and counts, and 16-bit bit-serial elements;
* 4 inputs and 4 outputs;
* the bus interface structure: transmitter with a mixer, receivers with a mixer, LPF and level
  detector giving data and VALID;
* 7-bit LFSR codes of 127 chips, with the feedback from stages 3 and 7;
* reload in one of 128 interface clocks per system clock;
* transmitter codes fixed, receiver codes in serially loaded caches;
* a sequencer that loads the setup information, so the array can be reconfigured every cycle;
* non-intrusive reprogramming;
* overflow on adders, multipliers and shifters;
* conversion of elements into delays by adding zero or multiplying by one;
* the CMA example and its Fig. 11-style program.

This design's own choices:

* the logic-level bus (exact sum, no noise) in place of the analog charge pump and filter;
* the VALID threshold of 64 and zero data when not valid;
* a single clock with a 1-in-128 system-clock enable, t1 first;
* one word period of latency for every element;
* the arithmetic formats: wrap-around with a flag, 8 fraction bits in the multiplier, and the
  shifter's operand and range;
* one configuration chain with shadow registers and a commit strobe (the original uses "several"
  serial buses);
* the transmitter and receiver numbering;
* the sequencer's insides: a program memory of 32 programs replayed one per word period in a
  start-then-loop order (the original names a controller/sequencer that loads the setup
  information, but does not describe it);
* parallel word ports with a word-valid flag;
* the CMA schedule of 16 word periods per sample (the original reports 11 cycles per frame).

Differences in detail:

* The original bus interface carries up to 65 concurrent transmissions on an analog bus. With
  the exact digital sum and a fixed threshold of 64, this design guarantees error-free decisions
  for up to 63 transmitters. The prototype size uses 54.
* The block diagram of the original bus interface shows one lookup table feeding the code
  generators of both the transmitter and the receivers. Its programming description says
  instead that transmitter codes are fixed in ROM. This design follows the programming
  description: a transmitter's code is a constant parameter, and only receivers have caches.
* The original stores the receiver codes in a lookup table inside each bus interface, loaded over
  serial buses. Here each receiver has its own 7-bit shadow register and active register in one
  chain. The commit strobe exists so that a whole new program applies at once.
* The original writes the CMA error as `ε = OUT(|OUT|²-1)` and subtracts `μ ε H*`. The testbench
  computes `e' = -ε` and adds, which is the same update.
* Logic elements that contain memory storage are mentioned only as a possibility. The delay
  blocks and the self-feeding adders are the only storage here.

Not included:

* control beyond replaying programs, such as branching or decisions on data, because the
  original describes none;
* shorter PN codes and time-multiplexing of the bus, suggested only as ways to speed the
  architecture up;
* bit error rates and other analog behaviour of the bus.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_pn_code_gen`: all 128 codes against the recurrence `x(n) = x(n-3) ^ x(n-7)`, period 127,
  64 ones per period.
* `tb_setup_cache`, `tb_bus_tx`, `tb_ma_bus`, `tb_dpaa_timing`, `tb_io_in_port`, `tb_io_out_port`:
  each against its timing and data rules.
* `tb_bus_rx`: 500 system clocks with 1 to 54 random transmitters on the bus; matched, unused and
  zero codes.
* `tb_bus_interface`: three interfaces on one bus, reprogrammed while running, with broadcast.
* `tb_bus_three_links`: three transmitters and three receivers on one bus. One receiver is
  switched to another transmitter every two bit cycles while data flows.
* `tb_le_*`: 400 random words each, including extreme values, against wide-integer references. The
  one-word latency and the overflow flags are checked.
* `tb_dpaa_top`: the full-size array with the CMA output program above. It checks the word-level
  model (`tb/dpaa_ref_pkg.sv`) every word period, with outputs, valids and all 34 overflow flags,
  and a word period of 2048 clocks. It requires that each of these happens: reprogramming,
  broadcast, an unconnected output, accumulation, a register by adding zero, adder, multiplier
  and shifter overflow, and programs loaded by the sequencer. The last nine word periods are
  programmed by the sequencer instead of the pins.
* `tb_dpaa_sequencer`: a 3-receiver, 4-program sequencer against a model of the chain. It checks
  the shift count, the commit position, the loaded codes, the start-then-loop order, a program
  rewritten during a run, and stopping and restarting.
* `tb_cma_adaptive`: the full-size array running the 4-tap CMA for 200 samples from the
  sequencer, about 6.5 M clocks (about 10 s). It checks the word-level model every period and the algorithm computed
  directly in the same arithmetic every sample. It also requires the dispersion
  `E[(|OUT|²-1)²]` to fall; in a typical run it drops from about 6400 to about 660 (units of
  1/65536).

To run a testbench with Verilator, list the packages first:

```
verilator --binary --timing -y rtl -y tb rtl/dpaa_pkg.sv tb/dpaa_ref_pkg.sv \
    tb/tb_dpaa_top.sv --top-module tb_dpaa_top && obj_dir/Vtb_dpaa_top
verilator --binary --timing -y rtl -y tb rtl/dpaa_pkg.sv tb/pn_ref_pkg.sv \
    tb/tb_bus_rx.sv --top-module tb_bus_rx && obj_dir/Vtb_bus_rx
```

The array synthesizes (Yosys, coarse) to about 3100 word-level cells and 6470 flip-flops. Most
flip-flops are the receivers' 14-bit accumulators and the elements' serial registers. The
sequencer adds a 21504-bit program memory (32 programs × 96 codes × 7 bits).
