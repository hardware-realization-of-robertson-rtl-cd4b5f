# Robertson's signed multiplier

Robertson's method multiplies two two's-complement numbers with the same
add-and-shift loop used for unsigned numbers, plus two small changes:

* when the partial product is shifted right, its **sign** is shifted in at the
  top, not a 0, so a partial product that went negative stays negative;
* the multiplier's sign bit weighs -2^(N-1), so in the **last** pass the
  multiplicand is **subtracted** instead of added.

This RTL builds the method as a purely combinational N x N-bit multiplier. The
loop is unrolled into a chain of N passes. It is provided at the six widths 4,
6, 8, 12, 16 and 32 bits.

## The working register

Each pass works on one register `m` of 2N+1 bits:

```
  m[2N:N]    partial product P, signed, N+1 bits
  m[N-1:0]   multiplier bits not yet consumed, lowest first in m[0]
```

It starts as N+1 zeros above the multiplier `b`. Each pass looks at `m[0]`,
which is the multiplier bit for that pass. It may change P, then shifts the
whole register right by one place. The shift copies P's new sign bit into
`m[2N]`. After N passes the low 2N bits of `m` hold the product.

P is one bit wider than the N bits the textbook description uses. That extra
bit is a deliberate departure, and it is what makes the design correct. Adding
`a` to an N-bit P can overflow (127 + 127 partial sums for 8 bits, for
example). The bit shifted in is then the wrong sign. A 2N-bit register that
keeps its top bit through the shift gives wrong products for about a third of
all 8 x 8 operand pairs (5377 instead of 16129 for 127 x 127). With N+1 bits,
P + a and P - a always fit: |P| <= 2^(N-1) and |a| <= 2^(N-1) at every pass.

## The passes

| pass          | multiplier bit | action on P              | module                 |
|---------------|----------------|--------------------------|------------------------|
| 0 .. N-2      | `m[0]` = 0     | none                     | `robertson_add_shift`  |
| 0 .. N-2      | `m[0]` = 1     | P <- P + a               | `robertson_add_shift`  |
| N-1 (last)    | `m[0]` = 0     | none                     | `robertson_final_step` |
| N-1 (last)    | `m[0]` = 1     | P <- P - a (`b` negative) | `robertson_final_step` |

Every pass ends with the sign-copying right shift. In the last pass `m[0]` is
always `b[N-1]`. The final step still tests both `b[N-1]` and `m[0]`, which
gives four branches: add, subtract, or shift only under either sign. Two of
these branches cannot happen inside the multiplier. The final step uses one
adder, fed with `a`, `-a` or 0.

Effect of the operand signs:

1. `a >= 0`, `b >= 0`: P never goes negative, so 0s are shifted in. It is the
   unsigned algorithm.
2. `a >= 0`, `b < 0`: P stays non-negative until the last pass, which
   subtracts `a`.
3. `a < 0`, `b >= 0`: 0s are shifted in until the first 1 of `b`. Adding `a`
   then makes P negative, and from then on 1s are shifted in.
4. `a < 0`, `b < 0`: the cases above combine. 1s are shifted in after the first
   add, and the last pass subtracts `a`.

## Modules

| file | what it is |
|------|------------|
| `rtl/robertson_pkg.sv` | the six widths, `wreg_width(N) = 2N+1` |
| `rtl/robertson_add_shift.sv` | one conditional add and sign-copying shift, parameter `N` |
| `rtl/robertson_final_step.sv` | last pass with subtraction, produces `mul`, parameter `N` |
| `rtl/robertson_mult.sv` | `a`, `b` (N bits) in, `mul` (2N bits) out, `N` = 8 by default |
| `rtl/robertson_multipliers.sv` | top: six independent `robertson_mult` at N = 4, 6, 8, 12, 16, 32, ports `a4 b4 mul4` ... `a32 b32 mul32` |

`robertson_mult` has no clock and no reset. Its 4N pins are only operands and
product. The product is valid one combinational delay after the operands
change. That delay runs through N adders of N+1 bits in series, so it grows
linearly with N. A design that needs a clock rate should register the inputs
and the output around it, or pipeline the chain between passes. Either change
is simple, because each pass is its own instance in `robertson_mult`'s
generate loop. Pass 0 always adds to zero, so a synthesis tool that
propagates constants through adders can remove its adder. The instance then
holds N-2 pass adders plus the add/subtract of the last pass.

Other widths: instantiate `robertson_mult #(.N(n))` with any n >= 2 (an
elaboration-time assertion checks this).

## Verification

Each testbench checks itself and prints `TB_RESULT checks=<n> failures=<n>`.

| testbench | what it covers |
|-----------|----------------|
| `tb/tb_robertson_add_shift.sv` | every 8-bit `a` against random reachable registers; reference from integer arithmetic |
| `tb/tb_robertson_final_step.sv` | every 8-bit `a`, both signs of `b`, all four branches counted |
| `tb/tb_robertson_mult.sv` | exhaustive 8 x 8 (default) and 4 x 4; 32 x 32 corner values and 20000 random pairs |
| `tb/tb_robertson_multipliers.sv` | the unmodified top, all six widths at once: corner values crossed, then 40000 random rounds; each of the four sign cases must occur at every width |

The reference in every case is the simulator's own signed multiplication or
integer arithmetic, not the algorithm. For example, to run the top-level test
with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/robertson_pkg.sv \
    tb/tb_robertson_multipliers.sv --top-module tb_robertson_multipliers
./obj_dir/Vtb_robertson_multipliers
```

Any testbench runs the same way. Each finishes in about a second.

## Where this departs from the textbook algorithm

* P carries a guard bit (see above). Without it, some products are wrong.
* The loop is unrolled into combinational logic. It is not a sequential
  machine with a counter. The method's loop counter survives only as the
  generate index.
* The six widths are gathered in one top module with port names that carry a
  width suffix. Each multiplier on its own has ports `a`, `b` and `mul`.
* Synthesis results are not reproduced here. The published FPGA figures (LUTs,
  slices, delays on Spartan-3 and Virtex-5) belong to a particular FPGA tool
  flow.
