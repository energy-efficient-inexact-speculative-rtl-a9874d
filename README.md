# Inexact Speculative Adder (ISA)

An exact N-bit adder is slow because a carry may have to ripple, or be looked
ahead, across all N bits. The inexact speculative adder cuts the carry chain
into short independent paths that add at the same time, and *guesses* the
carry into each path from a few operand bits just below it. Most of the time
the guess is right. When it is wrong, a small compensation unit notices and
limits the damage, so the result is approximate but its error stays small and
can be tuned. The intended use is error-tolerant computing (signal, image or
statistical processing), where giving up a little accuracy saves a lot of
delay, power and area.

This repository holds synthesizable SystemVerilog for the adder, a reference
model and self-checking testbenches, including an accuracy characterization.

## Structure

```
   A,B[31:24]      A,B[23:16]      A,B[15:8]       A,B[7:0]
       |     SPEC<--top bits |SPEC<--top bits |SPEC<--top bits|
       v      |          v    |         v      |         v
     ADD <----+        ADD <--+       ADD <----+       ADD <-- 0
       |  \            |  \           |  \             |
       |   cout-> COMP |   cout-> COMP|   cout-> COMP  |
       v         /   \ v          /  \v          /  \  v
    S[31:24]        S[23:16]        S[15:8]         S[7:0]
```

The default is N = 32 bits in P = N/X = 4 paths of X = 8 bits ("4x8").
Every path except the least significant one has three parts:

* **SPEC** (`isa_spec`) looks at the top `SPEC_W` operand bits of the path
  below and computes the group generate and propagate of that window, carry
  look-ahead style. If the window generates, the carry is certainly 1; if it
  kills, certainly 0. Only if every bit of the window propagates is the carry
  unknown; it is then guessed as `SPEC_CIN` (0 by default).
* **ADD** (`isa_add`) is an ordinary X-bit adder fed with the guessed carry.
  Its carry-out is not passed on as a carry. It only goes to the COMP of the
  next path up.
* **COMP** (`isa_comp`) compares the guessed carry of its path with the
  carry-out of the ADD below. A mismatch is a *speculation fault*.

The least significant path has a carry-in of 0 and no SPEC or COMP. The
critical path is one X-bit adder plus a `SPEC_W`-bit look-ahead, not N bits.

## Compensation: correcting and balancing

The sign of a fault's error is known. If the guess was 0 but the real carry
was 1, the upper path's sum is exactly 2^(i·X) too low. If the guess was 1 but
the carry was 0, it is that much too high. COMP compensates in the matching
direction. There are two ways to do it, and it picks one:

1. **Correction.** Add 1 to (or subtract 1 from) the `CORR_W` least
   significant bits of the upper path's sum. This cancels the error
   completely. It is allowed only if it does not overflow that small field:
   the field must not be all ones for an increment, or all zeros for a
   decrement. In that case a short incrementer would have to ripple further.
2. **Balancing.** When correction would overflow, the `BAL_W` most
   significant bits of the *lower* path's sum are forced to all ones (sum too
   low) or all zeros (sum too high). The error does not go away, but it
   shrinks by up to 2^(i·X) · (1 − 2^−BAL_W).

The incrementer/decrementer and its overflow flag depend only on the sum
bits. The fault bit only steers the final multiplexers, so the correction
logic stays off the speculative carry path.

Worked example: a 16-bit adder with 4x4 paths, 2-bit SPEC, 1-bit correction
and 2-bit balancing (`tb_isa_adder` checks it bit for bit):

```
  A            0001 1101 1111 1111
  B            1000 0101 0010 0011
  guessed cin     1    0    0    (0)     windows: PG, PP, PP
  block sums   1010 0010 0001 0010       carry-outs 0, 1, 1, 1
  boundary 3/2: guess 1 = cout 1         no fault
  boundary 2/1: guess 0 , cout 1         fault, LSB 0 -> 1  (corrected)
  boundary 1/0: guess 0 , cout 1         fault, LSB is 1: balance
                                         lower MSBs 00 -> 11
  result       1010 0011 0001 1110       exact sum 1010 0011 0010 0010
```

The result is off by 4. Without compensation it would be off by 16.

### Decrement direction

When `SPEC_CIN = 0`, a guess of 1 only happens when the window generates. A
generating window also makes the lower path's carry-out 1, so faults in the
decrement direction cannot occur. They appear when `SPEC_CIN = 1`. The RTL
handles both directions, and the testbench runs both.

## Parameters (`isa_adder`)

| parameter  | default | meaning |
|------------|---------|---------|
| `N`        | 32      | operand width |
| `X`        | 8       | path width. N must be a multiple of X, with at least 2 paths |
| `SPEC_W`   | 2       | speculation window, 1..X bits of the lower path |
| `CORR_W`   | 1       | width of the correction field (upper path LSBs) |
| `BAL_W`    | 2       | width of the balancing field (lower path MSBs) |
| `SPEC_CIN` | 0       | carry guessed when the whole window propagates |

`CORR_W + BAL_W <= X` is required, so that a path's corrected LSBs and its
balanced MSBs never overlap. Elaboration stops with `$error` otherwise.

The 32-bit width and the four uniform splits 2x16, 4x8, 8x4 and 16x2 are the
configurations this adder family is characterized in. The default split 4x8
is one of them. The 2/1/2 window and field sizes are those of the worked
example above. No SPEC or COMP sizes are published for the 32-bit variants,
so for them the defaults are a reasonable starting point, not a reproduction.
The accuracy the adder reaches depends strongly on these three sizes:

* `SPEC_W` sets the error rate and the mean error.
* A balancing field longer than the window lowers the mean error.
* A balancing field shorter than the window lowers both the mean and the
  worst-case error.
* The correction width improves the error rate, the mean error and the
  worst-case error.

## Ports (`isa_adder`)

| port        | dir | width  | meaning |
|-------------|-----|--------|---------|
| `a`, `b`    | in  | N      | unsigned operands |
| `s`         | out | N      | compensated approximate sum |
| `cout`      | out | 1      | carry-out of the most significant ADD |
| `fault`     | out | N/X−1  | bit k: fault at the boundary between path k+1 and path k |
| `corrected` | out | N/X−1  | bit k: that fault was corrected |
| `balanced`  | out | N/X−1  | bit k: that fault was balanced |

The adder is purely combinational: no clock, no reset, no registers. Register
its inputs and outputs as the surrounding pipeline requires. The three flag
vectors are for observation and statistics. The adder does not need them.

## Accuracy measured in simulation

`tb_isa_workload` applies two sets of 5,000,000 random operand pairs to the
default adder. One set is uniform. The other is log-uniform: the bit length is
uniform over 0..32, then the bits below the leading one are random. The
relative error is |S − (A+B)| / (A+B), with the carry-out included in S.
Typical output:

| 4x8, SPEC 2, corr 1, bal 2 | error rate | RMS rel. error | max rel. error |
|----------------------------|-----------:|---------------:|---------------:|
| uniform, compensated       | 17.5 %     | 0.058 %        | 12.5 %         |
| uniform, no compensation   | 32.8 %     | 0.34 %         | 99.8 %         |
| log-uniform, compensated   | 7.7 %      | 0.78 %         | 12.5 %         |
| log-uniform, no compensation | 15.1 %   | 7.8 %          | 100 %          |

`tb_isa_splits` does the same for all four splits, with example sizes: 2x16
with 4/3/4, 4x8 with 2/1/2, 8x4 with 2/1/2 and 16x2 with 2/1/1. The uniform
RMS error ranges from about 2e-5 % (2x16) to 3.5 % (16x2). Compensation cuts
the worst-case error from about 100 % to 12.5–25 %. Without it, a wrong
guess in a high path can wipe out most of the result.

## Where this RTL makes its own choices

* **Balancing value.** Balancing *forces* the lower MSBs to a constant, all
  ones or all zeros. It does not invert them. The two agree whenever the MSBs
  hold the opposite value, as in the worked example. The all-zeros value for
  the decrement direction mirrors the all-ones case.
* **Configurable guess.** `SPEC_CIN` is a parameter rather than a fixed 0.
* **Sub-adders.** They are written as `+`. The adder architecture inside
  each path, and whether the correction incrementer is built in parallel
  with the sub-adder, are left to synthesis.
* **Extra ports.** The carry-out and the fault, correction and balancing
  flags are brought out.
* **No area, power or timing results.** Numbers of that kind come from
  gate-level synthesis at multi-GHz targets in a 65 nm process. They cannot
  be reproduced from RTL simulation and are not claimed here.

## Files

| file | content |
|------|---------|
| `rtl/isa_spec.sv`  | carry speculator |
| `rtl/isa_add.sv`   | path sub-adder |
| `rtl/isa_comp.sv`  | fault detection, correction, balancing |
| `rtl/isa_adder.sv` | top level, N/X paths |
| `tb/isa_ref_pkg.sv` | integer reference model, log-uniform generator, relative error |
| `tb/tb_isa_spec.sv`, `tb/tb_isa_add.sv`, `tb/tb_isa_comp.sv` | exhaustive unit tests |
| `tb/tb_isa_adder.sv` | worked example, plus random tests of 4x8, 4x8 guessing 1, and 2x16 with flags, counting every mechanism |
| `tb/tb_isa_workload.sv` | 2 × 5 M sample characterization of the default adder |
| `tb/tb_isa_splits.sv` | the same for the 2x16, 4x8, 8x4 and 16x2 splits |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` at the end. For
example, with Verilator 5:

```
verilator --binary --timing --top-module tb_isa_adder -y rtl -y tb +libext+.sv \
          tb/isa_ref_pkg.sv tb/tb_isa_adder.sv -o sim && ./obj_dir/sim
```

Replace `tb_isa_adder` with any other testbench name. `tb_isa_workload` takes
about 5 s and `tb_isa_splits` about 20 s. Lint a module on its own with
`verilator --lint-only -Wall -y rtl rtl/isa_adder.sv`.
