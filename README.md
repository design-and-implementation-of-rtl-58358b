# Stochastic pulse-stream neurosystem (SFQ-style) in SystemVerilog

A neural network does one thing over and over: it multiplies each neuron's
output by a synaptic weight, sums the products into a membrane potential, and
passes that potential through an activation function:

    u_i(t+1) = sum_j w_ij * x_j(t)          x_i(t) = f(u_i(t))

This design does all three with **stochastic pulse streams** instead of binary
arithmetic. A value between 0 and 1 is carried as the probability that a pulse
is present in a clock cycle. Multiplying two independent streams takes a single
AND gate. Summing takes an up/down counter. A comparator against a random number
turns a binary value back into a stream. The circuits are small and pulse-based,
which suits single-flux-quantum (SFQ) superconducting logic. There, a "pulse" is
literally one flux quantum travelling down a line.

The RTL models those SFQ circuits as synchronous digital logic. Each signal
called `*_pulse`, `up`, `down` or `re` is 1 for exactly the clock cycles in
which the SFQ circuit would carry a pulse. The price of stochastic coding is
time. A result is only as precise as the number of clocks over which pulses are
counted: the **accumulation time N_a**.

## The network and its accumulation period

`stochastic_neurosystem` is a fully connected network of `N` neurons (default
4). Each neuron's output stream `x_pulse[j]` drives synapse `j` of every neuron,
its own included. That makes N*N synapses, and a zero weight removes a link.

Time is cut into periods of `NA` clocks (default 50):

```
clock      0   1   2  ...  48  49 | 0   1  ...
counters   <---- count Up/Down pulses ---->|<-- next period
step                               ^  (re: read out and clear every counter)
u[i]       value of the previous period    | new value from the next clock on
x_pulse    stochastic stream of f(u)       | follows the new u after 5 clocks
```

During a period each neuron's counter integrates the product pulses. In the
last clock the controller raises `step`. This is the read-out pulse `Re` of
every counter. All counters are copied into the membrane-potential registers
`u[i]` and cleared. All neurons therefore update together, which is the
synchronous dynamics of the equation above. The pulses that arrive during the
read-out clock are counted in the next period, so no pulse is lost at the
boundary.

Control ports:

| port | meaning |
|---|---|
| `w_we`, `w_row`, `w_col`, `w_data` | write weight `w[row][col]` (from neuron `col` to neuron `row`) as `{sign, 4-bit magnitude}` |
| `u_load`, `u_init[N]` | set all potentials, clear all counters, restart the period |
| `run` | the period counter advances only while high |
| `u[N]`, `x_pulse` | potentials (two's complement, 9 bits) and output streams |
| `step`, `step_count` | read-out pulse and number of completed periods |
| `up`, `down`, `up_merge`, `down_merge` | per neuron: the pulse lines into its counter, and flags for coincident pulses that merged |

## Inside a neuron

```
x_in[j] --> synapse j: multiplier --(sign)--> up_j / down_j
                           OR over j  --> Up ---\
                           OR over j  --> Down --> up/down counter --re--> u register --> activation --> x_pulse
```

### Two synaptic multipliers

`synapse` stores the weight as sign and magnitude. It multiplies the input
stream by the magnitude and routes each product pulse to Up (weight >= 0) or to
Down (weight < 0). The parameter `KIND` (type `sn_pkg::mult_kind_e`) selects one
of two multipliers.

**Divider multiplier (`MULT_DIVIDER`, the default).** This is the less obvious
of the two. It is a binary rate multiplier. A chain of toggle flip-flops counts
the input pulses. An input pulse ripples up the chain and stops at the first
flip-flop that held 0. So stage 0 ends the ripple for every second pulse, stage 1
for every fourth, and so on. The stages split the input into disjoint streams of
rates 1/2, 1/4, 1/8, 1/16. Non-destructive read-out cells (NDROs) hold the weight
bits. The MSB passes the 1/2 stream, the next bit the 1/4 stream, and so on. Hence

    P(out) = (w3/2 + w2/4 + w1/8 + w0/16) * P(x) = w/16 * P(x)

and every 16 input pulses produce **exactly** `w` output pulses. The multiplier
adds no randomness of its own. The only noise left is the coding noise already
in `x`. In SFQ this circuit is asynchronous. Here an output pulse appears in the
same clock as its input pulse.

**Comparator multiplier (`MULT_COMPARATOR`).** Each clock the weight is compared
with a 4-bit M-code random number. The "greater" pulse is ANDed with the input
pulse:

    P(out) = P(w > R) * P(x) = w/15 * P(x)

The divisor is 15 because the M-code generator never produces 1111. This
multiplier has two sources of coding noise: the input's and the weight's own.
The comparator is pipelined, with 3 clocks of latency, so the input pulse is
delayed by 3 clocks to meet it. One generator per neuron serves all its
synapses.

The trade-off between the two is this. The divider needs fewer gates and is more
precise for the same N_a, roughly 20 % lower RMS error in the test below. The
comparator is fully pipelined and synchronous, so its throughput does not depend
on the bit length.

### The pipelined comparator

`pipelined_comparator` compares two unsigned numbers every clock. Stage 0 is a
row of `cmp_bit` cells. Each cell emits X (a > b) or Y (a = b) for one bit.
Each level after that is a tree of `cmp_4in2out` cells. A cell merges the (X, Y)
pair of a high half with that of a low half:

    X = X_hi | (Y_hi & X_lo)        Y = Y_hi & Y_lo

Every cell is registered. The latency is 1 + ceil(log2 W) clocks (3 for 4 bits,
5 for 9 bits), and one comparison starts every clock. Widths that are not a
power of two are padded with "equal" constants.

### Up/down counter of adder cells

`adder_cell` stores one bit. An input pulse adds one to it. If the bit was
already 1, it returns to 0 and a carry pulse goes on. `updown_counter` chains the
cells:

* **Up** enters only the least significant cell, which adds +1.
* **Down** enters *every* cell at once. This adds the word 111...1, which is -1
  in two's complement. The carry out of the top cell is dropped.
* **Re** reads every cell in parallel and clears it. The value read is the count
  in two's complement.

In SFQ the pulses reach a cell one after another. In this synchronous model a
cell can receive two pulses in one clock (its Down pulse and the carry from
below). So a cell is a registered full adder, and the carries ripple within the
clock. Up and Down in the same clock cancel. The count wraps modulo 2^WIDTH. The
stand-alone default width is 4 bits. Inside the neuron it is 9 bits.

### Stochastic activation

`activation_function` compares the 9-bit potential with a **shorter** 7-bit
M-code random number. Because the random number covers only part of the
potential's range, the probability of an output pulse is a ramp. It is 0 below
the band of thresholds and 1 above it. This is a piecewise-linear sigmoid.
The band is centred on zero (threshold = rnd - 64). Both operands are converted
to offset binary so that the unsigned comparator orders them as signed numbers:

    P(x) = clamp((u + 64) / 127, 0, 1)

Each neuron's generator starts from a different seed (`sn_pkg::mcode_seed`) so
that the neurons' streams are not identical.

### M-code generator

`mcode_gen` is a maximal-length shift register. Its new bit is the XNOR (XOR
plus inverter) of the tap stages: x^4+x^3+1 for 4 bits, x^7+x^6+1 for 7 bits.
The taps of other widths come from the standard table in `sn_pkg`. With the
inverter in the loop, the all-zero power-up state lies on the sequence, so the
generator runs without a start signal. The period is 2^W - 1, and every value
except all-ones occurs once per period.

## What follows the original design and what is this implementation's choice

These parts follow the published SFQ design:

* the two multipliers and their probability laws;
* the 1-bit and 4in-2out comparator functions and the pipelined tree;
* the M-code generator (XOR, inverter, flip-flops, no start signal);
* the adder-cell counter, with Up to the LSB and Down to every cell;
* read-out by Re after N_a clocks;
* the comparator activation with a 9-bit potential, a 7-bit random number and
  N_a = 50;
* 4-bit weights and counter at the block level.

These are this implementation's choices:

* **Synchronous timing.** One pulse slot per clock. The divider multiplier and
  the counter carries settle combinationally within the clock.
* **Merging synapses onto one counter.** All Up pulses of a neuron are ORed onto
  one line, and likewise all Down pulses. This is like an SFQ confluence buffer:
  two pulses in the same clock become one, and a count is lost. `up_merge` and
  `down_merge` show when this happens. It biases the sum toward zero when many
  inputs are active.
* **Network size, weight format and loading.** N = 4 neurons, sign-magnitude
  weights, a weight write port, a potential-load port and a `run` input.
* **Centring of the activation ramp** on u = 0, and per-neuron random seeds.
* **The divider multiplier is the default.** It is better for area and
  precision. Set `KIND = sn_pkg::MULT_COMPARATOR` for the other one.
* **Where state lives.** A register holds each neuron's potential between
  read-outs. Each multiplier holds its own weight.

The Josephson-junction circuits themselves are not modelled. That covers the
bias currents, the operating margins (tens of GHz in the original) and the
physical layout.

## Limits at the default size

With 4-bit weights, a 9-bit potential and N_a = 50, one period can add at most
about 47 counts per input. The activation ramp, however, is 127 counts wide.
The loop gain of a small network is therefore below one. The network behaves as
a noisy, "high-temperature" system. In a trial with a 4-neuron associative
memory it drifted away from the stored pattern instead of settling into it.
Higher precision needs larger parameters. For 8-bit precision the multipliers
need N_a of 4096 to 8192 (see below). The counter must then hold that many
pulses, so the potential needs about 14 to 16 bits (`W_WIDTH = 8`,
`U_WIDTH = 16`, `NA = 8192`). Those parameter values are legal but are not the
defaults.

## Verification

Every block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_mcode_gen` | shift/XNOR rule, period 15 and 127, all-ones never reached |
| `tb_cmp_bit`, `tb_cmp_4in2out` | all input combinations, one clock latency |
| `tb_pipelined_comparator` | all 256 pairs at 4 bits and random 9-bit pairs, back to back, latency 3 and 5 |
| `tb_comparator_multiplier` | every output = (w > rnd) & x three clocks earlier, and exactly w pulses per 15 clocks with an M-code source |
| `tb_divider_multiplier` | exactly w outputs per 16 inputs for all w, no output without input |
| `tb_adder_cell`, `tb_updown_counter` | against a modulo model; the read-out sequence +5, +1, -2, -5 of a 4-bit counter |
| `tb_activation_function` | exact per-clock comparison, and exactly clamp(u+64, 0, 127) pulses per 127 clocks |
| `tb_synapse` | both kinds, sign routing |
| `tb_neuron` | weighted sum of collision-free inputs (u = -6), merging, load priority, activation counts |
| `tb_stochastic_neurosystem` | whole network at default parameters, 12 periods, with per-clock reference models of the divider multipliers, activations and counters, period length 50 |
| `tb_neurosystem_comparator` | the same with comparator multipliers |
| `tb_multiplier_rms` | RMS error against N_a, 10000 random trials per point |
| `tb_activation_curve` | transfer curve at N_a = 50, 10 trials per point |
| `tb_multiplier_8bit` | both multipliers at 8 bits: the N_a needed for an RMS error below 1/256 |

Results of `tb_multiplier_rms` (4-bit weights, RMS error of the output rate):

| N_a | comparator | divider |
|---|---|---|
| 64 | 0.036 | 0.029 |
| 256 | 0.018 | 0.014 |
| 1024 | 0.009 | 0.007 |

The error falls as 1/sqrt(N_a), and the divider multiplier is the more precise
one at every N_a.

At 8 bits (`tb_multiplier_8bit`, 400 trials per point) the RMS error drops below
one 8-bit step (1/256) at N_a = 8192 for the comparator multiplier and at 4096
for the divider multiplier. The divider needs half the accumulation time.

The network testbenches do not check network-level behaviour such as pattern
recall, because the default size is too noisy for it (see the limits above).

## Simulating

All files are in `rtl/` (design, one module or package per file) and `tb/`
(testbenches). The package `rtl/sn_pkg.sv` must be read first. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sn_pkg.sv tb/tb_stochastic_neurosystem.sv --top-module tb_stochastic_neurosystem
./obj_dir/Vtb_stochastic_neurosystem
```

Use the same command with another testbench name to run it. Lint a module with:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/sn_pkg.sv rtl/stochastic_neurosystem.sv
```

### Parameters of `stochastic_neurosystem`

| parameter | default | meaning |
|---|---|---|
| `N` | 4 | neurons |
| `NA` | 50 | clocks per accumulation period |
| `KIND` | `MULT_DIVIDER` | synaptic multiplier |
| `W_WIDTH` | 4 | weight magnitude bits (plus a sign bit) |
| `U_WIDTH` | 9 | counter and membrane-potential bits |
| `R_WIDTH` | 7 | activation random-number bits (must be less than `U_WIDTH`) |

Some lint warnings remain on purpose: they flag unused signals. These are the
comparators' "equal" output where only "greater" is needed, the random input
of a divider-kind synapse, the top carry of the counter, and observation
outputs.
