# Quantization-generic neurons and generated filters

Deeply quantized neural networks use very few bits per value. Sometimes only
the weights are a single bit, and sometimes both weights and activations are.
At one bit, the multiply-accumulate stops being a multiply-accumulate: a 1-bit
weight turns a multiplication into "add or subtract", and a 1-bit input times a
1-bit weight becomes an XNOR, with a popcount in place of the adder tree. The
main idea here is one neuron description whose multiply, sum and activation are
chosen per instance. The same module then gives a conventional integer neuron,
a binary-weight neuron or a fully binarized neuron, all built as combinational
logic with the weights folded in as constants.

Next to the neuron sit two small examples of hardware *generators*: a
three-point moving sum, and an FIR filter built from a coefficient list. They
show the same approach on a simpler circuit. One module, given a list of
constants, produces a whole family of circuits.

All files are SystemVerilog (IEEE 1800-2017). They lint cleanly with
`verilator -Wall` and are synthesizable.

## The neuron (`rtl/neuron.sv`, `rtl/c4ml_pkg.sv`)

A neuron computes

    y = f( (sum_i x_i * w_i) << |SHIFT| , THRESH )

Here `THRESH` is the negated bias: `b + sum` compared with 0 is the same as
`sum` compared with `-b`. The weights, threshold and shift are parameters, so
the module has only the input vector `in_i` and the output `out_o`. It has no
clock. The output settles in the same cycle as the input.

### Quantization schemes (`QUANT`)

| `QUANT`               | input `x_i`          | weight `w_i`          | product                   | sum                |
|-----------------------|----------------------|-----------------------|---------------------------|--------------------|
| `QUANT_UNIFORM`       | signed, `IN_W` bits  | signed, `W_W` bits    | `x*w`, `IN_W+W_W` bits    | signed adder tree  |
| `QUANT_BINARY_WEIGHT` | signed, `IN_W` bits  | bit 0 (1 = +1, 0 = −1)| `w ? x : -x`, `IN_W+1` bits | signed adder tree |
| `QUANT_BINARIZED`     | bit 0                | bit 0                 | `~(x ^ w)`, 1 bit         | popcount, unsigned |

### Widths: the part to read carefully

Every width is derived from the parameters by the functions in `c4ml_pkg`:

* product width `PROD_W` as in the table;
* pre-activation width `PACT_W = PROD_W + clog2(N)` for the two signed schemes,
  `clog2(N+1)` for the popcount. No input can overflow the sum.
* **The shift does not widen.** The sum is shifted left by `|SHIFT|` and then
  cut back to `PACT_W` bits, keeping the low bits. A large shift can therefore
  wrap the pre-activation. That is intended: the shift is a rescaling step whose
  range the network designer must respect. The tests include configurations
  where it wraps.
* ReLU output: `PACT_W + 1` bits, unsigned. `act - THRESH` is formed one bit
  wider than the operands, so it cannot wrap, and values ≤ 0 give 0.
* Sign output: 1 bit, `act >= THRESH`. For the binarized scheme the popcount is
  compared as an unsigned number. For the other two it is compared as a signed
  number.

`THRESH` is an `int` and must lie in `-2**PACT_W .. 2**PACT_W - 1`.
Elaboration stops with an error otherwise. In that range the difference
`act - THRESH` and the ReLU result always fit their widths.

Weights are a packed array `logic [N-1:0][W_W-1:0] WEIGHTS`, with element `i`
being the weight of input `i`. A concatenation therefore lists them from the
last input down to input 0: `{w2, w1, w0}`. All weights share one width `W_W`.

### Activations (`ACT`)

* `ACT_RELU`: `out = max(0, act - THRESH)`
* `ACT_SIGN`: `out = (act >= THRESH)`

Any scheme can be paired with either activation. A binarized neuron with ReLU
gives a small unsigned count above the threshold.

## The two example neurons

`dummy_uniform_module` has three 4-bit signed inputs, weights 1, −2, 3,
threshold −1, shift 1 and ReLU:

    out = max(0, 2*(x0 - 2*x1 + 3*x2) + 1)

Its pre-activation lies in −46…44 in a 9-bit sum, so the doubling never wraps.
The 10-bit output reaches at most 89. The three top output bits are therefore
always 0, and synthesis reports them as constant.

`dummy_binarized_module` has three 1-bit inputs, weights 1, 0, 1, threshold 2
and the sign test. The output is 1 when at least two inputs equal their weights.

## Stream filters

`moving_average3` keeps the last two samples in registers `z1` and `z2` and
outputs `in + z1 + z2`, truncated to `BIT_WIDTH` bits. The sum is meant to
wrap: the output is as wide as the input.

`fir_filter` is the generator version:

    out[t] = sum_{i<N} COEFFS[i] * in[t-i]

It has an `N-1` stage delay line. Tap 0 is the current input, not a register,
so the output answers a new sample in the same cycle. This is what makes the
1,1,1 filter compute the same thing as `moving_average3`, and makes 0,1 a delay
of exactly one cycle. The output is `BIT_WIDTH + COEF_W + clog2(N)` bits, which
is full precision: unlike `moving_average3`, this filter never wraps.
`COEFFS[i]` multiplies the sample that is `i` cycles old. `N = 1` is allowed and
builds no registers.

Both filters have a synchronous, active-high reset that clears the delay line.
The source circuits leave these registers without a reset value. The reset was
added so that simulation starts from a known state.

## Top level (`rtl/chisel4ml_top.sv`)

The top places the examples side by side under one clock and reset, with
`BIT_WIDTH = 8`:

| ports                              | circuit                                          |
|------------------------------------|--------------------------------------------------|
| `ma_in[7:0]` → `ma_out[7:0]`       | moving sum, wraps at 8 bits                      |
| `fir_in[7:0]` → `fir_avg_out[10:0]`| FIR 1,1,1                                        |
| `fir_in` → `fir_delay_out[9:0]`    | FIR 0,1 (one-cycle delay)                        |
| `fir_in` → `fir_tri_out[12:0]`     | FIR 1,2,3,2,1                                    |
| `uq_in[2:0][3:0]` → `uq_out[9:0]`  | uniform example neuron, `uq_in[i]` is `x_i`      |
| `bnn_in[2:0]` → `bnn_out`          | binarized example neuron, `bnn_in[i]` is `x_i`   |

The three FIR filters share one input so that their responses can be compared
on the same stream. The neurons do not use the clock.

## Departures and limits

* **FIR tap 0 is unregistered.** A reading in which every tap, including the
  newest, sits behind a register would add one cycle of latency to every FIR
  output. It would make 0,1 a two-cycle delay, and 1,1,1 would then differ from
  the moving sum. The unregistered form was chosen because it matches the
  behaviour the filters are meant to show.
* **Full-precision FIR output.** The width is `clog2(N)` bits of growth rather
  than one bit per addition. The values are identical. Only unused top bits are
  saved.
* **The binarized example uses the sign test.** It could also be written with
  ReLU, but only the sign test gives the 1-bit output that a binarized neuron
  passes on. The generic neuron supports both, and its testbench covers the
  ReLU pairing too.
* **One weight width per neuron**, rather than one width per weight.
* **Reset** on the filter registers, as described above.
* **Only single neurons are built.** There is no layer of neurons (many neurons
  sharing an input vector) and no whole-network pipeline of layers. A layer can
  be formed by instantiating `neuron` once per output with that output's
  weights.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench computes
its expected values with plain integer arithmetic, independently of the RTL. It
prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs.

| testbench                   | what it covers |
|-----------------------------|----------------|
| `tb_neuron`                 | five configurations: uniform/ReLU (exhaustive), uniform/sign with a wrapping shift, binary-weight/ReLU, binarized/sign and binarized/ReLU (exhaustive) |
| `tb_dummy_uniform_module`   | all 4096 inputs; checks that ReLU both clips and passes, and that the maximum output is 89 |
| `tb_dummy_binarized_module` | all 8 inputs, then random repeats |
| `tb_moving_average3`        | same-cycle response, one- and two-cycle history, wrap-around, reset |
| `tb_fir_filter`             | filters 1,1,1 / 0,1 / 1,2,3,2,1 / single tap 3: impulse response, then a random stream with full-scale samples |
| `tb_chisel4ml_top`          | whole top at default parameters for 3000 cycles, with a reset in mid-stream. It counts moving-sum wrap-around, FIR growth past 8 bits, ReLU clip and pass, both sign outcomes and the reset, and fails if any of them never happens |

A broken copy of each module was tested as well. Each of these faults made its
testbench fail:

* the sign test using `>`;
* a wrong threshold or weight;
* a delay line that does not shift;
* a wrong coefficient in the top.

No timing analysis or gate-level simulation has been done. The neurons are
purely combinational: for wide inputs or large `N`, the adder tree sets the
clock period of whatever registers surround it.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
        rtl/c4ml_pkg.sv tb/tb_chisel4ml_top.sv --top-module tb_chisel4ml_top -o sim
    ./obj_dir/sim

Replace `tb_chisel4ml_top` with any other testbench name. The package must be
listed first. Every other file is found by module name through `-y rtl`.

To make a new neuron, instantiate `neuron` with its own `QUANT`, `ACT`, `N`,
`IN_W`, `W_W`, `WEIGHTS`, `THRESH` and `SHIFT`. Declare the output
`c4ml_pkg::out_width(QUANT, ACT, N, IN_W, W_W)` bits wide. To make a new filter,
give `fir_filter` its `N`, `COEF_W` and `COEFFS`. Its output is
`BIT_WIDTH + COEF_W + clog2(N)` bits.
