# Reloadable FIR filter on New Distributed Arithmetic (NEDA)

A fully parallel, multiplier-free and memory-free FIR filter whose
coefficients can be replaced at any moment, in one clock, without
recomputing anything.

Classic distributed arithmetic (DA) builds an FIR filter from look-up tables
addressed by one bit of every input sample; each table entry is a sum of
coefficients. The tables grow as 2^TAPS words, and a new coefficient set
means recomputing and rewriting them. NEDA turns the roles around: the
arithmetic is distributed over the bits of the *coefficients*, and the
samples are added directly. No table exists, so a new coefficient set is
just a register load.

## The arithmetic

With 8-bit two's-complement coefficients with 7 fraction bits,

    c_k = -c_k[7] + sum_{b=0..6} c_k[b] * 2^(b-7)

the filter output y[n] = sum_k c_k x[n-k] regroups as

    y[n] = -P_7 + sum_{b=0..6} P_b * 2^(b-7),   P_b = sum_{k : c_k[b] = 1} x[n-k]

Each `P_b` is the sum of the samples whose coefficient has bit `b` set: a
row of 2:1 muxes (sample or zero) followed by an adder. There is one such
gated adder per coefficient bit, eight in all, working in parallel. A final
shift-and-add weights them by their bit position, with the sign-bit plane
`P_7` subtracted. The cost grows linearly with the number of taps (one mux
and one adder input per tap per coefficient bit), where DA tables grow
exponentially unless they are split.

The hardware computes the same value in integers. `P_b` is shifted left
by `b`, so the output keeps every bit and carries 7 + 7 = 14 fraction bits.
There is no rounding and no overflow.

## Structure

```
x_in ──► tap_delay_line ──taps[0..6]──┬──────────────┬─ ... ─┐
                                      ▼              ▼       ▼
coef_in ─► coef_reg ──coef──► plane 0 ► neda_mux_adder ... plane 7 ► neda_mux_adder
          (coef_load)                  │P_0                       │P_7
                                       └──────► neda_shift_add ◄──┘
                                                     │
                                                   y_out
```

| module | role |
|---|---|
| `neda_pkg` | default sizes and the width rules |
| `tap_delay_line` | input sample register: `taps[k] = x[n-k]`, synchronous reset |
| `coef_reg` | coefficient register, all `TAPS` coefficients replaced when `coef_load` is high |
| `neda_mux_adder` | one bit plane: gates each sample by its coefficient bit and adds them (`P_b`) |
| `neda_shift_add` | `y = -P_7·2^7 + Σ P_b·2^b` (bit planes, sign plane negative) |
| `neda_fir` | top: slices the coefficient register into bit planes (wiring) and connects the above |

The bit-plane slicing (`plane[b][k] = coef[k][b]`) is pure wiring. It is
done in `neda_fir` and has no module of its own. The same holds for the
change of binary-point label on the output.

## Interface and timing of `neda_fir`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | one sample and one output per clock |
| `rst` | in | 1 | synchronous, active high; clears samples and coefficients |
| `x_in` | in | `DATA_W` (8) | sample, two's complement, 7 fraction bits |
| `coef_load` | in | 1 | load `coef_in` into the coefficient register |
| `coef_in[TAPS]` | in | `COEF_W` (8) each | coefficients, 7 fraction bits; `coef_in[k]` multiplies `x[n-k]` |
| `y_out` | out | `Y_W` (19) | output, 14 fraction bits |

Parameters are `TAPS` (7), `DATA_W` (8), `COEF_W` (8), `PSUM_W` and `Y_W`.
`PSUM_W` is `DATA_W + clog2(TAPS)`, 11 by default. `Y_W` is
`PSUM_W + COEF_W`, 19 by default. The two width defaults are exact for any
input.

Timing:

- A sample presented before a rising edge enters `taps[0]` at that edge.
- `y_out` is combinational from the two registers. Right after the edge it
  holds the output that includes the new sample.
- A coefficient set loaded at an edge applies from that edge on: the output
  after the load already uses it. There is no pipeline and no latency beyond
  the input register.
- The critical path runs from a register through a `TAPS`-input adder and
  an 8-input adder. Deeper designs at high clock rates would add pipeline
  registers between the two.

## What is specified and what is chosen here

These follow the design as specified:

- 7 taps of 8-bit data.
- 8-bit coefficients with 7 fraction bits.
- Registered inputs.
- One mux-and-add unit per coefficient bit.
- Shifts of 7 down to 0 positions.
- A single final adder with the sign plane weighted −1.
- Fully parallel operation.
- Coefficients that can be reloaded at any time.

These are this implementation's own choices:

- **Reset:** synchronous and active high; it zeroes both registers.
- **Coefficient load:** a single load strobe that replaces the whole set.
- **Sample format:** samples use the same format as the coefficients
  (sfix 8.7). Only the 8-bit width is specified.
- **Output:** full precision. There is no rounding and no final output
  register.
- **Tap order:** `coef_in[k]` multiplies `x[n-k]`.
- **Shift form:** left shifts into an integer instead of right shifts of a
  fixed-point value. The value is the same.

Not included:

- The DA filter, which serves only as the baseline for comparison.
- The actual low-pass coefficient values, which are not given. The filter
  was designed for 10 kHz sampling with a 2 kHz cut-off. The testbench
  designs its own filter to the same specification.
- FPGA resource figures, which cannot be reproduced here.

## Testbenches

Every testbench checks itself and ends with
`TB_RESULT checks=<n> failures=<n>`. Each also has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_tap_delay_line` | the delay chain and reset against a software history |
| `tb_coef_reg` | load and hold against a model, over random load patterns and resets |
| `tb_neda_mux_adder` | random planes and samples, plus extreme inputs, against an integer sum |
| `tb_neda_shift_add` | random and extreme partial sums against a multiply-based reference |
| `tb_neda_fir` | whole filter at default size (see below) |
| `tb_neda_fir_taps14` | whole filter built with 14 taps; random data and reloads, full-scale case |

`tb_neda_fir` compares `y_out` every cycle with a direct convolution that
uses multiplications. It runs these phases in order:

1. Reset.
2. Two thousand random samples, with random coefficient sets reloaded while
   data streams.
3. The full-scale corner case: all samples and coefficients at −1.0, which
   gives the largest output, +7.0.
4. The low-pass workload. A 7-tap low-pass designed by the windowed-sinc
   method (Hamming window, cut-off 0.2·fs) is rounded to 7 fraction bits:
   `(-1 4 30 51 30 4 -1)/128`. It filters `0.75·sin(2π·100 Hz·t) +
   0.2·sin(2π·4 kHz·t)` sampled at 10 kHz. Measured over 1000 samples, the
   100 Hz tone comes out at amplitude 0.68 and the 4 kHz tone at 0.007.
   The testbench requires 100 Hz between 0.8× and 1.0× of its input
   amplitude, and 4 kHz below 0.1×.
5. A reload to a high-pass set in the middle of the tone.

It also counts that reset, reload while streaming, negative coefficients
and the full-scale output each occurred.

To simulate with Verilator (from the folder that holds `rtl/` and `tb/`):

```
verilator --binary --timing -y rtl rtl/neda_pkg.sv tb/tb_neda_fir.sv \
          --top-module tb_neda_fir -o sim && ./obj_dir/sim
```

The package goes first on the command line; `-y rtl` lets Verilator find
the modules by file name. Swap in any other testbench name the same way. All of them finish in well
under a second.

## Changing the design

- **Taps:** set `TAPS`. Widths follow automatically. `tb_neda_fir_taps14`
  shows the 14-tap build.
- **Coefficient precision:** set `COEF_W`. The number of bit planes, the
  shift amounts and the sign plane all follow from it. The output then has
  `7 + COEF_W − 1` fraction bits.
- **Sample width:** set `DATA_W`.
- **Pipelining:** a register on `psum` in `neda_fir` between the mux-adders
  and `neda_shift_add` splits the critical path at the cost of one cycle of
  latency.
