# Synthesized high-level assertions: the Prime example in RTL

C designs written for high-level synthesis often carry `assert()` statements.
They check the design while it runs as software, but synthesis drops them, so
an FPGA prototype of the design runs without its checks. The approach here
keeps each assert as a separate checker circuit that runs next to the design:

* The `assert` is removed from the design. In its place there is an
  **assertion starter**: a one-bit output that pulses when execution reaches
  the assert.
* Every variable the assert reads becomes an **auxiliary port** of the design.
  These are internal wires between the design and the checker, not device pins.
* A separate **assertion module** takes local copies of those variables when
  started, evaluates the condition on the copies, and reports `ready` and
  `fired`.
* The design never waits for the checker, so the checker adds logic but no
  cycles.

This RTL applies that scheme to one example: `main()` of the classic Prime
benchmark, with one assertion at the entry of `prime(n)` checking that `n` is
not a forbidden value. A firing collector brings assertion results out of
the chip in three forms: an OR, an encoder and a scan chain.

## Block structure

```
              start,x,y                       done,result,busy
                  |                                  ^
          +-------v----------------------------------+------+
          | prime_main  (assertion-free design)             |
          |   swap; return !(prime(y') && prime(x'))        |
          |   +-------------------------------+             |
          |   | prime_check  prime(n)         |--aux_n------+--> aux_n (n)
          |   |  (trial division)             |--assert_start--> starter
          |   +-------------------------------+             |
          +-------------------------------------------------+
                                   |aux_n     |assert_start
                             +-----v----------v-----+
                             | shila_assert_ne      |  n != FORBIDDEN_VALUE
                             |  shila_assert_core   |  (copy, evaluate)
                             +-----+----------+-----+
                                   |ready     |fired
                             +-----v----------v-----+
                             | shila_fire_collector |--> any_fired (OR)
                             |  shila_fire_encoder  |--> enc_valid, enc_index
                             |  shila_fire_scan     |--> scan_out (scan_load/shift in)
                             +----------------------+
```

All of these sit under `shila_top`. The shared default width and the `idx_w`
helper are in `shila_pkg`.

## The assertion module protocol (`shila_assert_core`)

This is the part every synthesized assertion shares, and the one to
understand first.

| edge | input seen        | effect                                               |
|------|-------------------|------------------------------------------------------|
| e0   | `enable = 1`      | `vars_copy <= vars_in`, `ready <= 0`, check pending  |
| e1   | (`enable = 0`)    | `fired <= !cond_ok`, `ready <= 1`                    |
| ...  | `enable = 0`      | nothing changes: `ready` and `fired` hold            |

* `fired` means **failure** (the asserted expression was false). It is only
  meaningful while `ready` is 1.
* The copies are taken on the enable edge. The design is free to change the
  variables from the next cycle on, which it normally does.
* The condition is not inside the core. The core outputs `vars_copy`, and a
  per-assertion wrapper computes `cond_ok` from it combinationally. This keeps
  one protocol implementation for any number of assertion wrappers.
  `shila_assert_ne` is the wrapper for `assert(n != FORBIDDEN_VALUE)`.
* An `enable` arriving while a check is pending restarts the check with the
  new values. In the Prime design two starters are always at least three
  cycles apart, so this does not occur there.
* Two concurrent assertions in the core state these rules: `ready` and
  "pending" are never both high, and a pending check that is not restarted
  produces its result on the next edge.

## The design IP (`prime_main`, `prime_check`)

`prime_check` computes `prime(n)`. An even `n` is prime only if it is 2. For
an odd `n` it tries the odd divisors 3, 5, 7, … while `i*i <= n`, one per
cycle, using a combinational remainder. `n` is prime if no divisor divides it
and `n > 1`.

Latency, counted in clock edges from the edge that samples `start` to the
edge that sets `done`:
* even `n`: 1 edge;
* odd `n`: 1 + k edges, where k counts the divisors tried, including the one
  that ends the loop.

In the cycle after `start` (state CHECK), `assert_start` pulses and `aux_n`
carries `n`. `aux_n` holds `n` for the whole call.

`prime_main` implements `swap(&x,&y); return !(prime(x) && prime(y));`. After
the swap, the first call is on the original `y`. The AND short-circuits: a
non-prime first operand ends the run after one call.
* Latency with one call: 2 + L1 edges.
* Latency with both calls: 4 + L1 + L2 edges, where L1 and L2 are the two
  `prime_check` latencies.

`prime()` holds the assert, and it is a called function. Its starter and its
local variable `n` are therefore passed up through `prime_main`'s ports. This
is the general rule for asserts in nested functions: their variables become
outputs of each caller in turn, up to the top of the design.

The benchmark's own operands are 21649 and 513239. Both are prime, and one
run takes 438 cycles. That count is the same with or without the assertion
attached.

## Getting firings out (`shila_fire_collector`)

Each assertion produces `ready` and `fired`. The collector first forms
`fired_valid = ready & fired` and then offers three views of it:

* `any_fired`: OR of all firings. One pin; it says only that something failed.
* `enc_valid`/`enc_index` (`shila_fire_encoder`): a priority encoder. The
  lowest-numbered firing assertion wins, and `index` is 0 when none fired.
* `scan_out` (`shila_fire_scan`): a shift register.
  * `scan_load` captures the vector, and assertion 0 appears on `scan_out`
    at once.
  * Each `scan_shift` cycle moves the next assertion to `scan_out`, filling
    the chain with zeros.
  * A load overrides a shift in the same cycle.
  * This uses one pin and is slower, but it names every assertion exactly.

The stand-alone default is five assertions. In `shila_top` there is one, so
`enc_index` is a constant 0 there.

## Parameters

| module | parameter | default | note |
|---|---|---|---|
| `shila_top`, `prime_main`, `prime_check`, `shila_assert_ne` | `DATA_W` | 32 | width of the C `unsigned int` |
| `shila_top`, `shila_assert_ne` | `FORBIDDEN_VALUE` | 0 | the value the assertion rejects |
| `shila_assert_core` | `NUM_VARS` | 1 | number of variables copied |
| collector, encoder, scan | `NUM_ASSERTS` | 5 | one bit per assertion |
| `shila_top` | `NUM_ASSERTS` (localparam) | 1 | the example has one assertion |

All logic uses a synchronous, active-low reset (`rst_n`) and the rising edge
of `clk`.

## How far to trust it, and where it departs from the method

Taken from the method itself:
* the enable/ready/fired interface of an assertion module;
* local copies taken in one cycle;
* `fired = 1` meaning failure, valid only while `ready` is 1;
* a one-bit starter per assertion;
* auxiliary ports, passed up through callers for nested functions;
* the OR, encoder and scan-chain options for bringing firings out.

This design's own choices:
* the one-edge evaluation latency and the restart rule;
* the reset behaviour;
* the split of each assertion module into a shared core and a condition
  wrapper;
* the forbidden value (0);
* the start/busy/done handshake;
* the one-divisor-per-cycle schedule of `prime_check`;
* the encoder's priority and the scan chain's bit order.

The Prime algorithm and operands are those of the widely used benchmark
program. The operands here are inputs rather than constants.

Differences from the published measurements:
* In the original flow, an HLS tool generated both the design and the
  assertion module. With that flow the Prime run took 302 cycles without
  the assertion and 306 with it. The 4 extra cycles came from the handshake
  between the generated blocks.
* The hand-written schedule here takes 438 cycles for the same run and adds
  no cycles for the assertion.
* The published area overheads (about 14% LUTs and 3.4% flip-flops on an
  FPGA) refer to that HLS flow and are not reproduced.

Not provided: the other benchmark designs used in the published speed-up
study (janne_complex, lcdnum, fibcall, sqrt, ADPCM encode/decode). Also not
provided: the inline-`if` form of assertion that the approach was compared
against.

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Each also has a watchdog. Example with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/shila_pkg.sv tb/prime_ref_pkg.sv tb/tb_shila_top.sv --top-module tb_shila_top
./obj_dir/Vtb_shila_top
```

| testbench | what it covers |
|---|---|
| `tb_shila_top` | whole system at default parameters. It runs the benchmark operands, the forbidden value in the first and second call, short-circuit and two-call runs, and random pairs. It checks results and cycle counts, checks every assertion result, and reads back the OR, encoder and scan outputs. It counts each mechanism and fails if one never occurred. |
| `tb_prime_workload` | the benchmark as a long workload at default parameters. It streams 300 back-to-back runs of `main()`: every other run uses the benchmark operands, and some runs carry the forbidden value. It checks every result, every run's cycle count and the total, and which runs fire. |
| `tb_prime_main` | `main()` results, latencies, and the order of starters and aux values |
| `tb_prime_check` | `prime(n)` on corner values, large primes and random values, with latency and starter checks |
| `tb_shila_assert_core` | copy, ready timing, hold, restart |
| `tb_shila_assert_ne` | firing exactly on the forbidden value |
| `tb_shila_fire_encoder` | all 32 input patterns |
| `tb_shila_fire_scan` | serial readout, hold, drain |
| `tb_shila_fire_collector` | ready gating, OR, encoder, scan |

`tb/prime_ref_pkg.sv` is the reference model. It tests primality by plain
trial division with every divisor from 2, and it computes the expected
latencies from the schedule described above.

## Adding another assertion

1. In the design, replace the `assert` with a one-cycle starter output, and
   bring the variables it reads out as auxiliary ports.
2. Write a wrapper like `shila_assert_ne`: instantiate `shila_assert_core`
   with `NUM_VARS` set to the number of variables, and compute `cond_ok`
   from `vars_copy`.
3. Widen `NUM_ASSERTS` in the top, and connect the new `ready`/`fired` pair
   to the collector.
