# Russian Peasant multiplier and an FIR filter built on it

This design is an unsigned integer multiplier made only of fixed shifts, 2:1
multiplexers and one carry-save adder. It uses the "Russian Peasant" method:
halve one number, double the other, and keep the doubled value whenever the
halved number is odd. The multiplier is used as the tap multiplier of a
direct-form FIR filter. That filter is the top level. Its coefficients can be
changed at run time, and each tap can be switched off, which changes the
filter's effective order.

| Module           | File                    | Role                                                |
|------------------|-------------------------|-----------------------------------------------------|
| `rpm_fir`        | `rtl/rpm_fir.sv`        | top: direct-form FIR, one multiplier per tap        |
| `rpm_multiplier` | `rtl/rpm_multiplier.sv` | W x W Russian Peasant multiplier (W = 8 by default) |
| `csa_adder`      | `rtl/csa_adder.sv`      | multi-operand carry-save adder inside the multiplier|

## From the peasant algorithm to hardware

Take 13 x 11 as an example. In the software form of the method, 13 is halved
(13, 6, 3, 1), 11 is doubled (11, 22, 44, 88), and the doublings whose halved
partner is odd are added: 11 + 44 + 88 = 143. "Halve and check odd" is the
same as reading the bits of the first operand one at a time. "Double" is a
one-place left shift. So an 8-bit multiplier unrolls into eight stages:

```
stage i :  select_i = LSB of (a >> i)            = a[i]
           value_i  = b << i                     (8+i bits wide)
           pp_i     = select_i ? value_i : 0     (2:1 multiplexer)
p = pp_0 + pp_1 + ... + pp_7                     (carry-save adder)
```

`a` is the multiplicand. It passes through a chain of right shifters, and the
LSB of each shifter output controls one multiplexer. `b` is the multiplier. It
passes through a chain of left shifters, so the stage outputs grow from 8 bits
to 15 bits. Stage 0 uses `a[0]` and `b` directly. The shifts are by a constant
amount, so they are wiring and cost no logic. The logic is the eight
multiplexer rows and the adder. `p` is 16 bits.

The parameter `W` sets the operand width. `W = 16` gives the 16-bit version:
16 stages and a 32-bit product.

## The carry-save adder

Adding eight operands with ordinary adders would chain eight carry
propagations. `csa_adder` keeps the running total as two vectors instead: a
sum vector and a carry vector. Each new operand goes through one row of full
adders. The row's bitwise XOR becomes the new sum vector. Its majority output,
shifted one place left, becomes the new carry vector. No carry runs along a
row, so each row adds the delay of one full adder. After the last operand, a
single carry-propagate addition merges the two vectors.

The rows form a linear array: operand 0 enters with a zero carry vector, and
operands 1 to N-1 each add one row. A Wallace or Dadda tree would have less
depth. It was not used because the linear array is the simplest circuit that
is a carry-save adder. The final merge is a plain `+`, so synthesis picks the
carry-propagate adder. The result is taken modulo 2^W. The multiplier's
product always fits.

## The FIR filter

`rpm_fir` computes

    Y(n) = sum_{k=0}^{TAPS-1} tap_en[k] * C_k * X(n-k)

with the textbook direct-form structure:

- A delay line of TAPS-1 registers holds X(n-1) ... X(n-TAPS+1).
- Tap 0 uses the incoming sample X(n) itself.
- Each tap has its own `rpm_multiplier`. The coefficient goes to the
  select (right-shifter) side and the sample to the left-shifter side.
- A chain of adders sums the products from tap 0 to tap TAPS-1.
- The adder chain is `CW + DW + clog2(TAPS)` bits wide (19 bits at the
  defaults), so it cannot overflow.

**Tap enable.** `tap_en[k] = 0` forces the coefficient seen by tap k's
multiplier to zero. Every multiplexer in that multiplier then selects 0, and
the tap adds nothing. Switching off trailing taps shortens the filter, and
switching off other taps cancels single products. The port is meant for an
external order-control unit that watches the input amplitude and decides
which products are worth computing. That unit is not part of this RTL,
because its decision rule (window length, thresholds, counter) is not
specified. With `tap_en = '1` the filter is a plain TAPS-tap FIR.

**Timing and handshake.**

- The design uses one clock, `clk`. `rst_n` is a synchronous, active-low
  reset. It clears the delay line, `y_out` and `y_valid`.
- When `x_valid` is high at a rising edge, the filter takes `x_in` as X(n),
  shifts the delay line, and loads `y_out` with Y(n). Y(n) is formed from
  `x_in` and the delay-line contents as they were before the shift.
- `y_valid` is high in the following cycle. The latency is one clock, and the
  filter accepts up to one sample per clock.
- When `x_valid` is low, the delay line and `y_out` hold their values.
- An assertion in `rpm_fir` checks this rule in simulation: outside reset,
  `y_valid` equals the previous cycle's `x_valid`.
- `coeff` and `tap_en` are sampled combinationally. A change applies to the
  next output that is produced.

The multiply-and-add path has no pipeline registers: from `x_in` and the delay
registers through a multiplier and the adder chain to the output register. The clock frequency
must fit that path.

### Parameters

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `TAPS` | 8 | number of coefficients (filter length) |
| `DW` | 8 | sample width |
| `CW` | 8 | coefficient width |
| `YW` | `CW+DW+$clog2(TAPS)` | output width |

`rpm_multiplier` has `W` (default 8). `csa_adder` has `N` operands (default
8) of `W` bits (default 16).

## What follows the original design and what does not

These parts follow the original design:

- the eight-stage multiplier structure: right and left shifter chains, one
  2:1 multiplexer per stage with a zero input, the stage widths, and the
  16-bit product;
- the use of a carry-save adder to add the stages;
- the direct-form filter with 8-bit coefficients and 16-bit products;
- Russian Peasant multipliers as the filter's tap multipliers.

These are choices made for this implementation:

- the number of taps (8);
- unsigned samples and coefficients. The multiplier structure is unsigned,
  because each multiplexer selects 0 or the shifted operand;
- the linear order of the carry-save rows and the final `+`;
- the output register, the `x_valid`/`y_valid` handshake and the reset;
- which multiplier input receives the coefficient;
- the `tap_en` port, which stands in for the unspecified order-control logic.

Missing: the amplitude-detection and control-generator logic that would drive
`tap_en`. No signed (two's complement) variant exists. Signed filtering would
need sign handling around the multiplier, for example by multiplying
magnitudes and restoring the sign.

## Verification

Each testbench checks its module against values computed independently in
the testbench. Each one prints `TB_RESULT checks=N failures=M`, and each has
a watchdog.

- `tb/tb_csa_adder.sv` tests an 8 x 16-bit instance and a 3 x 5-bit instance.
  The small instance exercises wrap-around. The test uses all-zero, all-ones,
  one-hot and 5000 random operand sets.
- `tb/tb_rpm_multiplier.sv` tests all 65 536 operand pairs of the 8-bit
  multiplier. The same run also tests a 16-bit instance on corner values and
  random pairs.
- `tb/tb_rpm_fir.sv` tests the top at its default parameters against a
  reference model. It checks every output value and the one-clock latency of
  `y_valid`. It also makes each mechanism happen and counts it:
  - an impulse, whose response must replay C0..C7 in order;
  - all-ones inputs, giving the largest output;
  - idle cycles;
  - tap-enable changes;
  - coefficient changes;
  - a reset in mid-stream.

Each check was also run against deliberately broken copies of the modules,
and each broken copy was caught:

- `csa_adder` with the carry vector not shifted;
- `rpm_multiplier` with the last stage's multiplexer stuck at 0;
- `rpm_fir` with the last tap left out of the sum.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl --top-module tb_rpm_fir \
    tb/tb_rpm_fir.sv rtl/rpm_fir.sv rtl/rpm_multiplier.sv rtl/csa_adder.sv
./obj_dir/Vtb_rpm_fir
```

To run another test, replace `tb_rpm_fir` with `tb_rpm_multiplier` or
`tb_csa_adder`. Each run takes well under a second. To lint the design:

```
verilator --lint-only -Wall rtl/rpm_fir.sv rtl/rpm_multiplier.sv rtl/csa_adder.sv
```
