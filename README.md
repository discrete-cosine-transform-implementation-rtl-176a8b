# Floating point FFT / DCT processor with a fully pipelined butterfly

This design computes a radix-2 fast Fourier transform, and from it a discrete
cosine transform (DCT-II), on IEEE-754 single precision data. It takes the
data-flow approach: one butterfly is built as a pipeline of ten floating
point units, one per real operation. Operands stream through it from one
data RAM into the other, one butterfly per clock. An address sequence
generator and a small controller keep the pipeline full, and a universal
controller loads the data and reads the results back.

The DCT reuses the FFT hardware. The N samples are zero-padded to 2N points
and transformed, which gives U(k). Then

    V(k) = Re[ H(k) U(k) ],   H(k) = alpha(k) exp(-j pi k / 2N),
    alpha(0) = sqrt(1/N),  alpha(k) = sqrt(2/N) for k > 0,

which equals the textbook DCT-II, V(k) = alpha(k) sum_n u(n) cos(pi (2n+1) k / 2N).
Two ways to form V(k) are built, and a run chooses one:

* **DCT pipeline.** Three more floating point units (two multipliers and a
  subtractor) read U(k) out of the FFT's result RAM and compute
  Hr Ur - Hi Ui.
* **Extra butterfly pass.** The address sequence generator runs the same
  butterfly once more over U(k), with B forced to zero and H(k) as the
  weight. Then D = U(k) H(k), and its real part is V(k). This needs no extra
  arithmetic, only more control.

## Block structure

```
dct_system
├── univ_controller      host stream, load / run / unload sequencing
├── fft_system
│   ├── addr_seq_gen     stage sequencing, read/write/weight addresses
│   ├── bfly_controller  opens and closes the butterfly ports
│   ├── fft_butterfly    10 x fpu_a29325
│   ├── 2 data RAMs      each ram_256x32 (re) + ram_256x32 (im)
│   └── weight RAM       ram_256x32 (re) + ram_256x32 (im)
└── dct_pipeline         3 x fpu_a29325, H RAM pair, local sequencer
```

`fft_pkg` holds the shared types: `fp32_t`, the complex struct `cplx_t`,
the operation codes, and the mode enum. It also holds the constants:
`ADDR_W = 8`, the RAM read latency `RAM_RD_LAT = 1` and the butterfly
latency `BFLY_LAT = 5`.

The RAM-bearing modules (`dct_system`, `univ_controller`, `fft_system`,
`addr_seq_gen`, `dct_pipeline`) take a parameter `AW`, the address width,
which defaults to `ADDR_W`. Every RAM then has 2^AW words. The default
gives the original 256-word RAMs. A larger `AW` lets larger transforms
fit, and all address ports and `out_index` widen with it.

## The floating point unit (`fpu_a29325`)

This is a simplified model of the AMD29325 floating point processor. It
does add, subtract, multiply and divide on single precision numbers and
registers its result, so latency is one clock.

The arithmetic differs from IEEE in these ways:

* Results are **truncated**, not rounded.
* An operand whose exponent field is 0 counts as zero, so denormals are
  flushed.
* Overflow gives all bits except the sign set.
* Underflow gives zero.
* An operand with exponent 255, or a division by zero, gives `7FFFFFFF` and
  raises the `nan` flag.

Because of truncation, the FFT results differ from a double-precision
reference in the last few bits. The testbenches allow a relative error of
1e-5 of the input's magnitude.

## The butterfly pipeline (`fft_butterfly`)

The butterfly is decimation in frequency: `C = A + B` and `D = (A - B) W`.
The ten units sit in three rows:

| row | units | computes |
|-----|-------|----------|
| 1 | 4 add/sub | Cr, Ci, R1 = A - B (re, im) |
| 2 | 4 mul | R1r Wr, R1i Wr, R1i Wi, R1r Wi |
| 3 | 2 add/sub | Dr = R1r Wr - R1i Wi, Di = R1i Wr + R1r Wi |

C and W travel beside the rows in delay registers.

Timing:

* `ie` loads A, B and W into the input register.
* Three clocks of arithmetic follow.
* `oe` loads the output register.
* A butterfly presented at clock t is on `c`/`d` at t+5.
* One butterfly enters and one leaves every clock, so all ten units are
  busy. Four of the five steps of each butterfly overlap with its
  neighbours.
* `enable` freezes the whole pipe.

## Memory organisation and the address scheme

Each data RAM holds one complex word per address, with real and imaginary
parts in separate 256 x 32 RAMs. A stage reads A and B in the same clock
(ports A and B of one RAM) and writes C and D to the *other* RAM. The RAMs
swap roles every stage, like a ping-pong buffer. Both input and output stay
in natural order, so no bit reversal is needed.

For an FFT of 2N points (N butterflies per stage), stage s has span
h = N >> s. Butterfly i then:

* reads A at `(i mod h) + 2h (i div h)` and B at `A + h`;
* writes C to `i` and D to `i + N`;
* takes its weight `W = exp(-j 2 pi (i mod h) / 2h)` from the next
  consecutive word of the weight RAM.

The weight RAM therefore holds every butterfly's weight in execution order,
N log2(2N) words in all. This is simple to sequence, but it stores repeated
weights. With 256-word RAMs the largest FFT is 64 points: 64 data words and
192 weights. The largest DCT is 32 points: its FFT weights plus 32 H(k)
make 224 weight words.

After log2(2N) stages the result is in RAM `osto`. That is the input RAM
when the number of stages is even, and the other RAM when it is odd.

## Handshakes inside the FFT system

The universal controller starts the address sequence generator by pulling
`che_n` low, with `log2_pts`, `isto` (input RAM), `dct_pass` and
`coef_base` valid. While `che_n` is high the generator is held idle.

For each stage the generator:

1. pulses `go` to the butterfly controller;
2. grants one read per clock while the controller requests input (`in_r`),
   counting reads up to N, then raises `in_e`;
3. grants one write per clock while the controller reports output
   available (`out_a`), counting writes up to N, then raises `out_e`;
4. bumps `stage_cnt` and swaps the RAMs.

The butterfly controller turns these into the pipeline enables:

* `ie` comes one clock after each granted read, when the RAM data arrive.
* `oe` goes up when its counter reaches `RAM_RD_LAT + BFLY_LAT - 1`.
* `out_a` goes up one clock after `oe`.
* `out_e` closes everything.

Each stage costs N + 6 clocks of streaming plus about 5 clocks of
bookkeeping. A 64-point FFT takes 260 clocks and an 8-point FFT 47.
`fft_cmp` then rises and stays high until `che_n` returns high.

## The universal controller and the host interface

`dct_system` has a streaming host interface:

* **Start.** Pulse `start` for one clock, with `mode` and `log2_pts`.
  `mode` is `MODE_FFT`, `MODE_DCT_PIPE` or `MODE_DCT_BFLY`; `log2_pts` is
  the FFT size, and a DCT has half that many points.
* **Input.** Send words on `in_valid`/`in_data`. A word moves when
  `in_ready` is also high. The order is:
  1. the samples: 2^log2_pts complex values for an FFT, or N real values
     for a DCT, whose imaginary parts are ignored. The controller writes
     the N padding zeros itself and holds `in_ready` low meanwhile.
  2. the weights: N log2(2N) complex words in the order above.
  3. for a DCT only, the N factors H(k).
* **Output.** Results come out on `out_valid`/`out_index`/`out_data`, one
  per clock, with no back-pressure. The real part holds V(k) for a DCT.
  `done` pulses after the last result.

The host computes the weight and H tables. The hardware only stores them,
which keeps trigonometry out of the design.

The controller's sequence:

1. Load RAM 0 and the weight RAM through the FFT system's external port.
   For `MODE_DCT_BFLY`, H(k) goes into the weight RAM after the FFT
   weights. For `MODE_DCT_PIPE`, it goes into the DCT pipeline's own RAM.
2. Pull `che_n` low and wait for `fft_cmp`.
3. Finish according to the mode:
   * `MODE_FFT`: read the 2N bins from RAM `osto`.
   * `MODE_DCT_BFLY`: raise `che_n` for one clock, then start one more pass
     with `dct_pass = 1`, `isto = osto` and `coef_base` just past the FFT
     weights. That pass reads A = U(k) at address k, forces B = 0 and
     writes D to k + N. The controller then reads addresses N..2N-1 and
     keeps their real parts.
   * `MODE_DCT_PIPE`: start `dct_pipeline`. Its reads of U(k) go through the
     same external port, and its V(k) stream becomes the output.

## Where this design departs from the original description

* **One clock edge.** The original alternates rising-edge arithmetic units
  with falling-edge registers, which gives a butterfly latency of three and
  a half clocks. Here everything is on the rising edge, and the latency is 5
  clocks.
* **Synchronous RAM with two ports.** The original RAM model is
  asynchronous, with setup and access times. It moves A and B (or C and D)
  over one 64-bit bus on the two clock phases. Here each RAM has two
  synchronous ports with a read latency of one clock.
* **One external memory port.** The original's separate select and
  memory-access signals for each RAM are folded into one port with a bank
  select.
* **Control encodings are this design's own.** The length input is
  log2 of the point count. `che_n` is active low and `fft_cmp` active high.
  The FPU chip enable is active high.
* **NaN and infinity patterns.** The bit patterns of the original chip are
  not used; see the FPU section.
* **The DCT factor.** This design uses exp(-j pi k / 2N) with a zero-padded
  2N-point FFT, which is exactly the DCT-II. Some of the original's formulas
  are written with an N-point kernel.
* **Not built:** the five alternative butterfly structures, which use fewer
  floating point units and more steps. The original compares them with the
  full pipeline but builds only the latter. Also not built: the full AMD29325
  feature set (other formats, conversions, rounding modes), and the
  suggested radix-4 and weight-reuse improvements.
* **Size limit.** At the default size the original's 1024-point example
  does not fit. It needs 1024 data words and 5120 weights, against
  256-word RAMs. Built with `AW = 13`, the design runs it (see below).

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_fpu_a29325` | random operands of all four operations against a truncated double-precision result (within one unit in the last place); zero, overflow, underflow, division by zero, NaN, enable hold, one-clock latency |
| `tb_ram_256x32` | fill and read back through both ports, read latency, deselected ports, random traffic against a model |
| `tb_fft_butterfly` | a stream of random butterflies; 5-clock latency; freezing with `enable` |
| `tb_bfly_controller` | the enable and request sequence and its timing, against a modelled address generator |
| `tb_addr_seq_gen` | every read, write and weight address of 2- to 64-point runs and of the DCT pass, stage counting, OSTO, run length |
| `tb_fft_system` | an 8-point example against its published spectrum; random 2-, 32- and 64-point FFTs against a direct DFT |
| `tb_dct_pipeline` | V(k) values, order, 3-clock latency |
| `tb_univ_controller` | the load addresses, padding, run parameters, CHE release and result path of all three modes, against behavioural stand-ins |
| `tb_dct_system` | the whole design end to end at its default sizes |
| `tb_fft_workloads` | the whole design built with `AW = 13`: a random 1024-point FFT and the 8-point example, against a direct DFT and against the rated step count |

`tb_dct_system` runs an 8-point FFT against the published example, a
64-point FFT, and 8- and 32-point DCTs by both methods against a direct
DCT-II. It also counts that each mechanism actually occurred: stages, RAM
swaps, overlapped butterflies, zero padding, back-pressure, DCT pipeline
runs and extra butterfly passes.

The original rates the full pipeline butterfly at one step per butterfly
plus 4 steps of pipeline fill per stage, which is (512 + 4) x 10 = 5160
steps for 1024 points. `tb_fft_workloads` measures
5232 clocks from `che_n` falling to `fft_cmp`. The extra 7 or so clocks per
stage are the synchronous RAM read, the longer butterfly latency and the
stage handoff. For 8 points the figures are 47 clocks against 24 steps.

To simulate with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_dct_system \
    -y rtl -y tb +libext+.sv -Irtl rtl/fft_pkg.sv tb/tb_dct_system.sv
./obj_dir/Vtb_dct_system
```

Replace the top module and file to run any other testbench. The whole
end-to-end test takes well under a second.
