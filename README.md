# Matched delay sampler and generator

A matched delay sampler turns a serial bit stream into parallel words. A matched
delay generator turns parallel words back into a serial stream. Both get a timing
resolution much finer than one gate delay, and their clock runs N times slower
than the sample rate. They do this with two tapped delay lines that run side by
side. The data (or the edges being built) travel down one line with a delay `Dd`
per stage. The clock travels down the other with a delay `Dc` per stage. Each
stage has a latch between the two lines. Adjacent stages then act at instants
`dt = |Dc - Dd|` apart, so resolution comes from the *difference* of two
delays, not from the delay itself. With `Dc = 400 ps` and `Dd = 300 ps`, the
stages sample 100 ps apart, although no element switches faster than every
few hundred picoseconds.

This repository holds SystemVerilog for both structures, in their
*continuous* form: they take or deliver one N-sample word every clock period
with no gaps. The default size is 64 stages at 100 ps, which is a 6.4 ns
(156.25 MHz) clock and 10 Gsample/s on the serial side. The generator can
also play back a 512-sample pattern memory.

The two delay-line cores are timing structures, not logic. They are
**behavioural models** with `#` delays. Everything around them is
synthesizable RTL: deskew and out-of-phase latches, synchronization FIFOs,
output register, edge encoder and pattern memory.

## One clock edge, N samples (`md_sampler_core`)

Clock edge `e` reaches stage `i` at `t_e + T_INS + i*Dc`. The data tap of stage
`i` shows the input as it was `i*Dd` earlier. So stage `i` samples the input at

    t_e + T_INS + i*(Dc - Dd) = t_e + T_INS + i*dt

One edge therefore takes N consecutive samples, `dt` apart. With the clock
period `T = N*dt`, the next edge takes up exactly where this one stopped. Here
`Dc > Dd` (the clock line is the slower one), so stage 0 holds the earliest
sample. `T_INS` is the insertion delay from the clock pin to stage 0 (see
*Timing choices* below).

## Why continuous operation needs extra hardware

The latch outputs of one edge never form a word at any single instant, for
two reasons:

1. **Skew along a section.** Stage `i` is latched `Dc` after stage `i-1`.
2. **Several edges in flight.** `Dc` is much larger than `dt`, so an edge needs
   longer than `T` to cross the whole line. The line splits into `SECTIONS`
   *clock sections* of `N/SECTIONS` stages. Each section is crossed by a
   different edge during a given period, and an edge crosses one section per
   period. This gives `Dc = T/(N/SECTIONS) = SECTIONS*dt`. `Dc` must be a
   whole multiple of `dt`, or the sections would need clocks of different
   phases.

The sampler back end (`md_sampler_align`) repairs both problems in three steps.
Take section `k` of edge `e`, with rising edge `e` at time `t_e`:

| step | part | what it does | when the data of edge `e`, section `k` moves |
|---|---|---|---|
| 1 | deskew latches (`md_deskew_latches`, upstream half) | hold the first half of each section for T/2 on the inverted clock | falling edge at `t_e + k*T + T/2` |
| 2 | synchronization FIFOs (`md_section_fifo`, sampler order) | delay section `k` by `SECTIONS-1-k` clocks | rising edges `e+k+1 ... e+SECTIONS-1` |
| 3 | output register | captures all N bits at once | rising edge `e+SECTIONS` |

Step 1 works because stage `j` of a section is latched at `j*T/(N/SECTIONS)`
into the period. The upstream half is latched in the first half of the period
and the downstream half in the second. After the upstream half has been held
until mid-period, every stage of the section is valid around the next rising
edge. Step 2 works because section `k` was sampled `k` periods after section
0. Section 0 therefore waits `SECTIONS-1` clocks and the last section waits
none. The result is that `smp_word` holds the N samples of edge `e` at rising
edge `e+SECTIONS`, bit 0 earliest. **The sampler latency is SECTIONS = Dc/dt clocks**, so a finer
resolution at the same `Dc` costs latency as well as FIFO registers.

In the 16-stage, 4-section example the deskew latches sit on stages 0-1, 4-5,
8-9 and 12-13. Stages 0-3 pass three FIFO registers, stages 4-7 two, stages
8-11 one and stages 12-15 none. The RTL computes these placements from `N` and
`SECTIONS` (`md_pkg::in_half`, `md_pkg::fifo_depth`).

## The generator: toggles and an XOR chain (`md_generator_core`)

The generator has the same two-line layout with the flow reversed. Each stage
has a **toggle latch** clocked by its clock tap. The data line is a chain of
**XOR gates**, each with delay `Dd`. XOR `i` combines the output of XOR `i-1`
(a constant 0 for the first) with toggle latch `i`. An XOR passes rising and
falling edges from upstream, and its own latch can add an edge. A toggle of
stage `i` on edge `e` reaches the output at

    t_e + T_INS + i*Dc + (N-i)*Dd = t_e + T_INS + N*Dd + i*dt

so the edges of one clock edge are also placed `dt` apart. Since
`N*Dd = (SECTIONS-1)*T`, bit `i` of the word accepted on edge `c` appears on
`gen_dout` from `t_c + (SECTIONS-1)*T + T_INS + i*dt`, for a time `dt`.

**Edge encoding (`md_gen_encoder`).** Toggle latches need to know *where the
level changes*, but the user supplies levels ("sample-like" words). The encoder
XORs each bit with the bit before it in serial order. Bit 0 is compared with
the last bit of the previous word, which the encoder remembers. A 1 means
"make an edge here". After reset the serial level is 0, so the output
reproduces the input words exactly.

**Consecutive-data additions (`md_gen_align`).** These mirror the sampler's.
Section `k` is delayed `k` clocks by a FIFO, because the edge that clocks
section `k` was launched `k` periods before it arrives there. The downstream
half of every section then goes through out-of-phase latches on the inverted
clock. Those stages are clocked in the second half of the period and must not
see the next word too early.

**Pattern memory (`md_pattern_mem`).** It holds 512 samples as
`512/N` words (8 words of 64 bits by default). You load it through a write
port. While `play` is high it plays words `0..last_addr` in a loop, one word
per clock, and `wrap` marks the last word. When `play` is low it outputs
zeros. `gen_src_mem` selects between this memory and the `gen_word` port.

## Top level (`md_top`)

Sampler and generator stand side by side on one clock:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, period `T = N*DT_PS` ps |
| `rst_n` | in | 1 | asynchronous reset, active low; give it a falling edge |
| `smp_din` | in | 1 | serial input of the sampler |
| `smp_word` | out | N | N consecutive samples, bit 0 earliest, SECTIONS clocks after the sampling edge |
| `smp_valid` | out | 1 | pipeline filled after reset |
| `gen_src_mem` | in | 1 | 1: generator plays the memory, 0: `gen_word` |
| `gen_word` | in | N | word to generate, bit 0 first in time, taken on each rising edge |
| `mem_we`, `mem_waddr`, `mem_wdata` | in | 1, log2(512/N), N | memory write port |
| `mem_play`, `mem_last_addr` | in | 1, log2(512/N) | play words `0..mem_last_addr` in a loop |
| `mem_wrap` | out | 1 | memory output is the pattern's last word |
| `gen_dout` | out | 1 | serial output of the generator |

Parameters, all of type `int unsigned`:

| parameter | default | meaning |
|---|---|---|
| `N` | 64 | stages = samples per word |
| `SECTIONS` | 4 | clock edges in flight; gives `Dc = SECTIONS*dt` = 400 ps, `Dd = Dc - dt` = 300 ps |
| `DT_PS` | 100 | resolution `dt` in ps |
| `T_INS_PS` | `SECTIONS*DT_PS/2` = 200 | clock insertion delay of the two cores; must lie between 0 and `Dc` |
| `SAMPLES` | 512 | pattern memory size in samples |

`N` must be a multiple of `2*SECTIONS`, and `SECTIONS` must be at least 2.

## Timing choices of this implementation

- **Clock insertion delay.** The synthesizable registers and the cores share
  `clk`. If stage 0 were clocked at exactly the rising edge, the first
  generator stage would sample its toggle bit at the instant the FIFO changes
  it. The cores therefore delay their clock by `T_INS`, `Dc/2` by default.
  Any value strictly between 0 and `Dc` puts every latch instant inside the
  valid window of the data it reads (the sampler also tolerates 0).
- **Out-of-phase latches** are registers on the falling edge of `clk`, not
  transparent latches.
- **Sign of `Dc - Dd`.** The clock line is the slower one (`Dc > Dd`), so time
  runs from bit 0 to bit N-1.
- **64-stage section count.** Four sections (Dc = 4 dt, as in the 16-stage
  example) is a choice. Other values work if `N/SECTIONS` stays even, but they
  change `Dc`, `Dd` and the latency.
- **Reset.** All synthesizable state and the toggle latches reset to 0 on a
  falling edge of `rst_n`. The sampler's own stage latches have no reset: they
  refill on every clock. Hold `rst_n` low over at least one rising edge.

## How far the models go

- The delay elements are **ideal transport delays**. Every edge survives,
  however short the pulse. Real elements have a minimum pulse width (1 ns was
  measured for a 25 ps-resolution sampler), suffer data-dependent delay,
  gradients and noise, and need delay-locked-loop compensation against
  process and temperature. None of that is modelled, and the DLL is not part
  of this RTL.
- The cores' delays are fixed by parameters. An adjustable resolution (a
  control voltage on the delay elements) is not modelled.
- Receivers, drivers and anything that uses the samples (for example clock and
  data recovery for 622 Mbps links) are outside this design.

## Files

| file | kind | content |
|---|---|---|
| `rtl/md_pkg.sv` | package | `half_e`, `fifo_order_e`, section/half/FIFO-depth functions |
| `rtl/md_sampler_core.sv` | behavioural | sampler delay lines and stage latches |
| `rtl/md_deskew_latches.sv` | RTL | half-section latches on the inverted clock (sampler and generator) |
| `rtl/md_section_fifo.sv` | RTL | per-section FIFOs, sampler or generator order |
| `rtl/md_sampler_align.sv` | RTL | deskew + FIFOs + output register |
| `rtl/md_gen_encoder.sv` | RTL | level-to-edge encoder |
| `rtl/md_gen_align.sv` | RTL | FIFOs + out-of-phase latches for the generator |
| `rtl/md_generator_core.sv` | behavioural | clock line, toggle latches, XOR chain |
| `rtl/md_pattern_mem.sv` | RTL | 512-sample pattern memory |
| `rtl/md_top.sv` | top | sampler and generator side by side |

## Simulating

All files use `timeunit 1ps`. The cores need Verilator's timing support:

    verilator --binary --timing --assert -y rtl +libext+.sv rtl/md_pkg.sv \
        tb/tb_md_top.sv --top-module tb_md_top -o sim
    ./obj_dir/sim

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
(there is a watchdog). The same command works for every `tb/*.sv`; change the
file and the top module. The block testbenches run their module at its default
64-stage size.

| testbench | what it checks |
|---|---|
| `tb_md_top` | default 64-stage design end to end. The generator output loops back to the sampler through a `T - dt/2` wire. Every bit of `gen_dout` is checked mid-bit against the accepted word. Every `smp_word` is checked against the word accepted `2*SECTIONS` clocks earlier. Covers random words, memory load, short and full-memory playback and source switching, and fails if word-boundary edges, inner edges, wraps, switches or deskew/out-of-phase activity never occurred |
| `tb_md_top_fig16` | the same test with 16 stages and 4 sections (T = 1.6 ns) |
| `tb_md_sampler_core_25ps` | the 64-stage core at 25 ps (Dc = 100 ps, Dd = 75 ps) used single-shot: isolated 1 ns clock pulses, input pulses of at least 1 ns at arbitrary picosecond times, all 64 samples of every shot checked |
| `tb_md_sampler_core` | each stage samples the stream at `i*dt` and updates at `i*Dc` |
| `tb_md_generator_core` | edges `dt` apart, latency `N*Dd`, serial level against a reference |
| `tb_md_deskew_latches` | both halves, against a falling-edge model |
| `tb_md_section_fifo` | both orders, per-section depth |
| `tb_md_sampler_align` | re-assembly of skewed stage outputs, latency SECTIONS |
| `tb_md_gen_encoder` | XOR encoding including the word boundary |
| `tb_md_gen_align` | every toggle bit stable around its latch instant |
| `tb_md_pattern_mem` | loading, looping, wrap, idle output |

Any verilator random initialisation (`+verilator+rand+reset+2`) must give the
same result. The testbenches start from a clean reset for that reason.

Lint notes: Verilator reports `SYNCASYNCNET` for the two cores. The warning
comes from the delay-line taps, which feed both clocked latches and delay
processes, and it is expected for these models.
