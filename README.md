# Pipelined 8-tap FIR filter with radix-4 Booth multipliers

A finite impulse response filter computes each output as a weighted sum of
the most recent input samples. Built the obvious way (the direct form), the
samples run through a delay line and the eight products are added up in one
long chain, so every clock period has to cover one multiplication and seven
additions. This design rearranges the same arithmetic so that a register
sits after every adder. Each clock period then covers only one multiplication
and one addition, whatever the number of taps. The filter still takes one new
16-bit sample per clock and produces one 32-bit output per clock.

The multipliers are signed 16 x 16 radix-4 (modified) Booth multipliers,
which halve the number of partial products compared with a plain array
multiplier.

## The pipelined structure

The input sample `x` is broadcast to all eight multipliers at once. Multiplier
`k` forms `t[k] = h[k] * x`. The products are summed along a chain of adders,
with a delay register after each one:

```
  x ──┬──────────┬──────────┬─── ... ───┬
      × h[0]     × h[1]     × h[2]      × h[7]
      │          │          │           │
     [q0]──────(+)──[q1]──(+)──[q2]─ ... (+)──[q7]──> yn
```

```
q[0] <= h[0] * x
q[k] <= q[k-1] + h[k] * x      k = 1 .. 7
yn    = q[7]
```

Compared with the direct form, the registers have moved from the input
delay line into the sum path (the "transposed" form). A sample's product with
`h[7]` reaches the output at the clock edge that takes the sample. Its
product with `h[0]` enters at the far end of the chain and needs seven more
edges to arrive. After edge `n`:

```
yn(n) = h[7] x(n) + h[6] x(n-1) + ... + h[0] x(n-7)
```

### Coefficient order

`h[0]` sits at the start of the chain, as in the original structure. The
filter therefore applies the coefficients in reverse order compared with the
usual `y(n) = sum h(i) x(n-i)`, and its impulse response on `yn` is
`h[7], h[6], ..., h[0]`. For a linear-phase filter, such as the window
design below, the coefficients are symmetric and the order makes no
difference. For a non-symmetric response, load the coefficients reversed.

### Latency and the pipeline fill

- The input is not registered.
- The output is registered.
- The first effect of a sample shows in `yn` right after the rising edge that
  takes it. Its full contribution has arrived seven edges later.
- After a clear, `yn` is a correct convolution from the first sample onward,
  with the earlier samples taken as zero.

### Clear

`clr` is asynchronous and active high. It zeroes all eight partial-sum
registers, which empties the pipeline. Coefficients may change at any time.
Each product, however, uses the coefficient value present at the edge when
it is formed, so an output can mix old and new coefficients for up to seven
samples after a change. Clear the filter when the coefficient set changes, or
accept that transient.

### Word widths

- Samples and coefficients are 16-bit two's complement.
- Each product is 32 bits wide and exact.
- The chain adds in 32 bits and wraps modulo 2^32.

Eight full-scale products can exceed 32 bits. Q15 coefficients whose
absolute values sum to less than 2, as a low-pass design gives, never
overflow. Set `ACC_W` wider if your coefficients need more room.

## Radix-4 Booth multiplier

`booth_mult` multiplies the recoded operand `x` (in the filter, the
coefficient) by `y` (the sample). The 17 bits `{x, 0}` are cut into eight
overlapping groups of three: group `j` is `{x[2j+1], x[2j], x[2j-1]}`. Each
group selects one multiple of `y`:

| group | digit |   | group | digit |
|-------|-------|---|-------|-------|
| 000   | +0    |   | 100   | -2y   |
| 001   | +y    |   | 101   | -y    |
| 010   | +y    |   | 110   | -y    |
| 011   | +2y   |   | 111   | +0    |

`booth_pp` does this selection and returns an 18-bit partial product. That
width holds every multiple, including `-2 * (-32768)`. `booth_mult`
sign-extends the eight partial products, shifts partial product `j` left by
`2j`, and adds them up. The adder structure is left to synthesis. The
multiplier is combinational: the register after the adder in each tap closes
the one-multiply-one-add stage.

## Modules

| file | module | role |
|------|--------|------|
| `rtl/fir_pkg.sv` | `fir_pkg` | default sizes (8 taps, 16-bit data, 32-bit sums), the Booth digit enum `booth_op_e` and the recoding function |
| `rtl/booth_pp.sv` | `booth_pp` | one Booth group: recoding and partial-product selection |
| `rtl/booth_mult.sv` | `booth_mult` | signed W x W radix-4 Booth multiplier |
| `rtl/addsub.sv` | `addsub` | W-bit adder/subtractor (`add_sub` = 1 adds); the filter only adds |
| `rtl/dflop.sv` | `dflop` | W-bit D flip-flop with asynchronous clear: the delay element |
| `rtl/fir8_pipe.sv` | `fir8_pipe` | the filter (top level) |

`fir8_pipe` ports:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | one sample is taken per rising edge |
| `clr` | in | 1 | asynchronous clear of the pipeline, active high |
| `x` | in | 16 | signed input sample |
| `h[0:7]` | in | 8 x 16 | signed coefficients; `h[0]` enters at the start of the chain |
| `yn` | out | 32 | signed output, registered |

The module parameters are:
- `TAPS` (default 8): the number of taps.
- `DATA_W` (default 16): the sample and coefficient width. It must be even.
- `ACC_W` (default 32): the sum width. It must be at least `2*DATA_W`.

For a 3-tap filter, set `TAPS = 3`. An 8-tap filter with five zero
coefficients gives the same result.

## Where this design makes its own choices

The following follow the original design:
- the tap structure and coefficient order;
- the register after every adder;
- the Booth recoding table;
- the 16/32-bit widths;
- the port names of the multiplier (`x`, `y`, `p`), the adder (`dataa`,
  `datab`, `add_sub`, `result`) and the flip-flop (clock, clear, `d`, `q`).

The following are choices made here:
- **Coefficients are ports.** This lets one netlist serve any coefficient
  set. A fixed-coefficient version would replace `h` with constants.
- **Asynchronous clear.** The clear is asynchronous and active high.
- **No clock on the adder.** The original adder module has a clock input. It
  is left out here because each adder is followed by its own `dflop`.
- **Booth partial-product reduction.** Partial products are summed
  behaviourally rather than as an explicit array or tree.
- **Overflow.** Sums wrap on overflow. There is no saturation.
- **No handshake.** There is no valid/ready signal. The filter runs
  continuously at one sample per clock.

The direct-form (non-pipelined) filter is not included. It was only a point
of comparison for the pipelined one.

## Simulating

Each testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. To build and run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/fir_pkg.sv tb/tb_fir8_pipe.sv --top-module tb_fir8_pipe -Mdir obj_fir
./obj_fir/Vtb_fir8_pipe
```

| testbench | what it shows |
|-----------|---------------|
| `tb_booth_pp` | all eight Booth groups against digit x y computed arithmetically |
| `tb_booth_mult` | corner and 20,000 random products against integer multiplication |
| `tb_addsub` | add and subtract, including carry and borrow boundaries |
| `tb_dflop` | one-clock delay, hold between edges, clear without a clock edge |
| `tb_fir8_pipe` | the full-size filter, end to end (details below) |
| `tb_fir8_fig9` | a worked example (details below) |
| `tb_fir8_lowpass` | a Kaiser-window low-pass filter (details below) |

`tb_fir8_pipe` runs the full-size filter end to end:
- a step response;
- impulse responses, which check latency and coefficient order;
- 1,800 random full-range samples at one per clock, each compared with the
  convolution sum (including wrap-around);
- asynchronous clears in the middle of a stream.

`tb_fir8_fig9` runs a worked example. The input is held at `x = 13`, with
`h = 1, 2, 29, 13, 12, 11, 5, 3`. The testbench builds the filter at every
length from 1 to 8 taps. Their outputs must settle at the running sums inside
the 8-tap chain: 13, 39, 416, 585, 741, 884, 949 and 988. It also checks the
step responses edge by edge.

`tb_fir8_lowpass` designs an 8-tap low-pass filter by the Kaiser-window
method and runs it through the hardware:
- sampling rate 5000 Hz, cut-off 1000 Hz, `beta = 2`;
- Q15 coefficients `-1224 0 5708 11900 11900 5708 0 -1224`;
- sine inputs at 250, 500, 1000 and 2000 Hz;
- every output sample is compared with the exact convolution;
- the measured gains must be about 0.98, 0.94, 0.48 and 0.003.

## Limits of what has been verified

All of the above is functional simulation. There is no timing analysis, so
this repository does not show the clock-rate gain of the pipelined form over
the direct form. One would expect it to be large, since the critical path
drops from `T_M + 7 T_A` to `T_M + T_A`, but that has to be measured on the
target technology. Booth-multiplier timing and area also depend on how
synthesis maps the behavioural partial-product sum.
