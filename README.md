# Goal-directed iterative divider ("annealing" divider)

This is an unsigned integer divider. Each clock it removes the largest power-of-two multiple of
the divisor that is guaranteed to fit into the current partial remainder. The multiple comes from
comparing bit counts, so no trial subtraction is needed. A restoring or non-restoring divider
works through the dividend one quotient bit per cycle. This design instead jumps straight to the
leading part of the remainder and skips runs of zero quotient bits. Each step does two
arithmetic operations: an (m+1)-bit subtraction builds the new partial remainder, and an addition
builds the quotient. Both happen in the same iteration. No multiplexer picks quotient bits.

The method comes from a simulated-annealing view of division. The first, "global" step is a large
move towards the goal. Later, "local" steps fill in what is left. A step is accepted with
probability 1 or 0 by a fixed rule, and the "temperature" reaches its goal once no step fits any
more. In hardware, that comes down to the step rule below. The default build divides a 256-bit
dividend by a 128-bit divisor.

## The step rule

Let `Y'` be the partial remainder (initially the dividend `Y`), `X` the divisor, `n` and `m` the
number of significant bits of `Y'` and `X`, and `A = n - m`.

| condition             | step                                                    | quotient  |
|-----------------------|---------------------------------------------------------|-----------|
| `A >= 1`              | `Y' -= X << (A-1)`: subtract X from the top m+1 bits of Y' | `Q += 2^(A-1)` |
| `A == 0` and `Y' >= X`| `Y' -= X`                                               | `Q += 1`  |
| otherwise             | stop; `Y'` is the remainder                             |           |

**Why the `A >= 1` step never goes negative.** The top `m+1` bits of `Y'` form a number of at least
`2^m`, because the top bit is a one. `X` is below `2^m`. So `window - X` is always positive. A step
of `2^A` could overshoot: shifting `X` by `A` puts it level with `Y'`, which may be smaller. The rule
therefore uses `A-1`. This is also why the bits below the window (`Y'[A-2:0]`) pass through
unchanged. The new partial remainder is just `diff || Y'[A-2:0]`.

Worked examples, both checked in the testbench:

* `101110 / 10111` (46 / 23): `A = 1`, so subtract `X` from the top 6 bits, giving `10111` and `Q = 1`.
  Then `A = 0` and `Y' >= X`, so subtract once more, giving `0` and `Q = 10`. Two iterations.
* `11101 / 11` (29 / 3): the partial remainders are `10001` (Q += 4), `101` (Q += 4) and `10` (Q += 1).
  Three iterations. Result: Q = 9, R = 2.

**Iteration count.** The second example shows that a step can leave the length of `Y'` unchanged
(`11101` becomes `10001`). Two steps at the same length always shorten it: two subtractions of
`X >= 2^(m-1)` from a window below `2^(m+1)` leave less than `2^m`. So an n-bit by m-bit division
takes at most `2(n-m)+1` iterations, and that bound is reached (all-ones divided by 1). The
sharper bound of `n-m+1` that is sometimes quoted for this method does not hold in general. The
end-to-end testbench counts how often random operands go past it. Typical operands need far fewer
iterations than the worst case.

## Datapath

```
            dividend                 divisor
               |                        |
          [Register A]           [divisor register]
               | (LOAD)                 |
               v                        |
   +----> [Register R] = Y' ------------+-------------------+
   |           |                        |                   |
   |           v                        v                   |
   |     S1: bit count of Y' - bit count of X  -> A, shift = A-1
   |           |                                            |
   |           +---------- shift ----------+                |
   |                                       v                v
   |     S2: window = Y' >> shift ; diff = window - X (M+1 bits) ; ge = no borrow
   |           | y_new = diff || Y'[shift-1:0]
   +-----------+                     (remainder path)

   S1 shift --> [Register B] --> adder: Q + (1 << B) --> [Register Q]   (quotient path)
```

* **Register A** (`reg_a` in `sa_divider`) holds the dividend. **Register R** holds `Y'`. It is
  loaded from A once, then from S2 on every accepted step. Its value at `done` is the remainder.
* **Subtractor S1** (`sa_sub_s1`) has two leading-one detectors (`sa_bitlen`) and a small
  subtractor. It outputs `A`, the flags `A >= 1` and `A == 0`, and `shift = A-1`.
* **Subtractor S2** (`sa_sub_s2`) picks out the window with a right shifter and subtracts with an
  `(M+1)`-bit subtractor. It puts the result back with a left shifter and a mask. Its no-borrow
  output `ge` is also the acceptance test for the final unit step.
* **Quotient path** (`sa_quot_path`): Register B captures `{valid, shift}` of the accepted step. In
  the next clock the adder adds the one-hot word `1 << shift` into Register Q. So the quotient
  trails the remainder by one clock. The controller's last cycle, which finds that no step fits,
  adds the final pending step.
* The one-cycle datapath runs through a leading-one detector, a barrel shifter, the
  (M+1)-bit subtractor and a second shifter. Its timing at 256/128 bits has not been closed on any
  target. Pipelining it would change the latency stated below.

## Control and timing

`sa_div_ctrl` is a four-state machine (`sa_div_pkg::div_state_e`):

* **IDLE / DONE.** `start` captures the operands into Register A and the divisor register. DONE
  lasts one cycle with `done` high. A `start` during DONE begins the next division at once.
* **LOAD.** Sets `R <- A` and clears Register B and Register Q. A zero divisor goes straight to
  DONE.
* **ITER.** One step per clock while the rule accepts. The first cycle where no step fits moves to
  DONE.

Interface of `sa_divider #(N, M)`:

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | sampled when not busy, with `dividend` and `divisor` |
| `dividend` / `divisor` | in | N / M | unsigned operands |
| `busy` | out | 1 | LOAD or ITER |
| `done` | out | 1 | one-cycle pulse, result valid |
| `quotient`, `remainder` | out | N | stable from `done` until the next start |
| `div_by_zero` | out | 1 | divisor was zero: quotient 0, remainder = dividend |

**Latency.** The design takes `iterations + 3` clocks from the clock edge that samples `start` to
the first edge that sees `done`. Those are one capture, one LOAD, `iterations` accepted steps and
one end-detecting cycle. A zero divisor takes 2 clocks. `start` is ignored while `busy`.

Parameters are `N` (dividend width, default 256) and `M` (divisor width, default 128). `N` may
equal `M`. Register Q and Register R are `N` bits wide.

Immediate assertions in the RTL check three rules. An `A >= 1` step must never borrow in S2,
Register B must be empty when `done` is shown, and the quotient adder must never overflow.

## Choices made in this implementation

The description of the method leaves several points open or inconsistent. This design resolves
them as follows:

* **Termination.** The design stops when no step fits (`A < 0`, or `A == 0` with `Y' < X`). That
  also covers a dividend smaller than the divisor, which gives Q = 0 and R = Y.
* **Equal lengths.** At `A == 0` the unit step is taken only if `Y' >= X`. Otherwise `Y'` already
  is the remainder. `Y' == X` gives remainder 0 with a quotient increment.
* **Zero divisor.** Handling it is this design's own choice (see the table above).
* **Added structure.** The divisor register, the LOAD cycle, the handshake and the asynchronous
  reset are additions. So is the encoding of B by its exponent: Register B stores the bit
  difference, not the N-bit word.
* **No FPGA figures.** FPGA resource and delay figures for this method are not reproduced here.
  No timing or LUT results are claimed for this RTL.

## Files

| file | content |
|---|---|
| `rtl/sa_div_pkg.sv` | controller state type |
| `rtl/sa_bitlen.sv` | significant-bit counter (leading-one detector) |
| `rtl/sa_sub_s1.sv` | subtractor S1, bit difference A and shift |
| `rtl/sa_sub_s2.sv` | subtractor S2, top-window subtraction and re-append |
| `rtl/sa_quot_path.sv` | Register B, adder, Register Q |
| `rtl/sa_div_ctrl.sv` | controller |
| `rtl/sa_divider.sv` | top level |
| `tb/tb_sa_ref_pkg.sv` | reference helpers: bit counts, random operands, step replay |
| `tb/tb_sa_sub_s1.sv`, `tb/tb_sa_sub_s2.sv`, `tb/tb_sa_quot_path.sv`, `tb/tb_sa_div_ctrl.sv` | unit testbenches |
| `tb/tb_sa_divider.sv` | end-to-end test at the default 256/128 size |
| `tb/tb_sa_divider_configs.sv`, `tb/tb_sa_div_runner.sv` | 16/16, 32/32, 64/32 and 256/128 builds |

## Verification

Every testbench checks its block against values computed independently. Quotient and remainder
come from the language's own `/` and `%`. Iteration counts and partial remainders come from
replaying the step rule on 512-bit words in `tb_sa_ref_pkg`. Each testbench has a cycle watchdog
and ends with a `TB_RESULT checks=... failures=...` line.

`tb_sa_divider` runs at the default parameters. It covers both worked examples, the corner cases
(zero divisor, zero dividend, dividend below, equal to or just above the divisor, all-ones
operands), a start pulse during a division, a back-to-back start, and random divisions at operand
sizes from 4/4 to 256/128 bits. It checks the latency of every division. It also counts each loop
mechanism from the controller signals and fails if one never occurs: a safe step, a unit step, an
end at equal length, an end with a shorter remainder, a step that keeps the length, a zero
divisor, an ignored start and a back-to-back start. `tb_sa_divider_configs` builds the divider at
16/16, 32/32, 64/32 and 256/128 bits. It confirms that the worst case reaches `2(N-1)+1`
iterations (31, 63, 127 and 511).

Run a testbench with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sa_div_pkg.sv tb/tb_sa_ref_pkg.sv \
          tb/tb_sa_divider.sv --top-module tb_sa_divider -o sim
./obj_dir/sim
```

The unit testbenches are built the same way; replace the last file and the top module name.
Lint the RTL with `verilator --lint-only -Wall -Irtl rtl/sa_div_pkg.sv rtl/sa_divider.sv`.
