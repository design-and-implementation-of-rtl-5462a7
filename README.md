# A two-neuron network that trains itself in a memory-swapping pipeline

This is synthesizable SystemVerilog for a small single-layer feed-forward
neural network with on-chip training. 125 inputs plus a constant bias input
feed two neurons:

    Y_k = sum_{i=1..125} x_i * w_ki + theta_k      o_k = tanh(Y_k)      k = 1, 2

The hardware trains the weights itself, without a processor and without a
coded state machine. A memory-address counter acts as the timer. An all-zero
word stored in memory ("zero-byte") marks the end of each weight vector. A
J-K toggle flip-flop swaps the roles of two weight memories per neuron after
every iteration. In one pass over memory the network reads the old weights,
updates them, evaluates itself with the new weights and stores the new
weights, all at once.

## The training rule

The rule is a finite-difference estimate of the gradient, cut down until it
needs neither a multiplier nor a divider:

* E = sum over both neurons of (o - t)^2. This is the usual squared error
  with its factor 1/2 left out.
* Eh is the same error with **every** weight raised by h = 0.5.
* dE/dw = (Eh - E) / (2h) = Eh - E. The 1/2 left out of E cancels against
  2h = 1.
* w <- w - dE/dw, with a learning rate of 1.

So each iteration evaluates the network twice: once with the weights w, and
once with the copies w + h. It then moves **all** weights by the same scalar
amount. This is a crude rule. With h = 0.5 and a learning rate of 1 it
easily overshoots:

* In the end-to-end test E (in units of 1/256) falls from 36 to about 20
  within a few iterations and then stays there, because Eh - E rounds to a
  zero step; other data sets make E swing back and forth between two
  values.
* With inputs of larger total magnitude, one update drives every weight
  into saturation, and the derivative becomes zero from then on.

The hardware carries out the rule exactly. Judge it as a rule before
relying on it.

Training stops in either of two cases:

* E of an iteration is at or below the `err_goal` input (the network has
  learned). `converged` is then set.
* `MAX_ITER` (50) iterations have run.

## Number formats

Every operand (x, w, o, t) is 8-bit **sign-magnitude**, written S DDD.FFFF:

* bit 7 is the sign (1 = negative);
* bits 6:4 are the integer part;
* bits 3:0 are sixteenths.

The range is ±7.9375 in steps of 0.0625.

| value   | code |
|---------|------|
| 5.3 (stored as 5.3125) | `8'h55` |
| -5.3    | `8'hD5` |
| 3.25    | `8'h34` |
| -7.9375 | `8'hFF` |
| 1.0     | `8'h10` |
| -0.0625 | `8'h81` |

Derived quantities (`nn_pkg` holds all widths):

| quantity | form | unit |
|---|---|---|
| product x*w | sign + 14-bit magnitude | 1/256 |
| positive / negative accumulators | 21-bit unsigned (126 products of 127*127 fit) | 1/256 |
| Y | 22-bit two's complement | 1/256 |
| o - t | 9-bit two's complement | 1/16 |
| (o - t)^2, E = E1 + E2 | 16 / 17-bit unsigned | 1/256 |
| dE/dw | 14-bit two's complement, rounded to nearest from the 1/256 difference | 1/16 (weight units) |

## Memory map and the zero-byte

Stage 1 has five 256x16 memories: the input memory and two weight memories
per neuron (A and B). A data byte occupies the low half of its 16-bit word;
the upper byte is zero.

| address | weight memories | input memory |
|---|---|---|
| 0 .. 124 | w for x1 .. x125 | x1 .. x125 |
| 125 | bias weight theta | 1.0 (`16'h0010`) |
| 126 | zero-byte `16'h0000` | unused |
| 127 | spare, ignored | unused |
| 128 .. 253 | w + h for the same inputs | read at address - 128 |
| 254 | zero-byte | |
| 255 | spare, ignored | |

A 16-input zero test on neuron 1's weight word detects the zero-byte. That
detection ends a half: stage 2 forms Y and clears its accumulators, and the
result flows on through stages 3 and 4.

Because the vector end is data, the hardware does not fix the number of
inputs. Any count up to 126 works if the markers are placed accordingly.

Two rules follow from using the all-zero word as a marker:

* **A weight of zero must be stored as minus zero (`16'h0080`).** The update
  logic does this itself whenever a result is zero.
* **Both memories of a pair need their markers loaded.** Nothing is ever
  written at or after the marker of a half, so the markers of the written
  memory must already be there.

## Memory swapping (stage 5 control)

`swap_ctrl` counts addresses 0..255, one per clock, and then waits for
stage 4's derivative pulse. That pulse toggles the J-K flip-flop `q` (J = K)
and restarts the count.

During a pass, each clock does the following for each neuron:

1. Read the weight at the current address from the read memory (A when
   `q = 0`, B when `q = 1`).
2. Subtract the derivative of the previous iteration (`weight_update`).
3. Multiply the result by x (`sm_mult`).
4. Write the result to the other memory of the pair at the same address,
   one clock later.

So each memory is only ever read or only ever written during a pass, and
single-port RAMs are enough. The first iteration of a run uses derivative 0,
so it evaluates the stored weights unchanged and copies them across.

When training ends, the newest weights are in the memory that `bank_q` now
names for reading. A new `start` continues from them.

## Pipeline and timing

| clock | action |
|---|---|
| n | address issued |
| n+1 | memory data; weight update and multiply |
| n+2 | products registered (`stage1`) |
| n+3 | accumulate, or Y on the zero-byte (`stage2_accum`) |
| n+4 | tanh and target table read (`stage3_error`) |
| n+5 | (o - t)^2 registered |
| n+6 | E held (first half), or Eh, derivative and stop decision (second half) (`stage4_deriv`) |

An iteration is 256 address clocks. The derivative appears 6 clocks after
the second zero-byte address. The next iteration starts on the clock after
that. Derivative pulses are therefore **261 clocks apart**, which is 2.61 µs
at 100 MHz. A 50-iteration run takes about 130.5 µs.

For comparison, the original schematic implementation reached 2.935 µs per
iteration with a divider in stage 3, and about 2.725 µs without one. Its
memory timing (1.28 µs per 128-word half) is also what puts one word per
10 ns clock.

## Stage 3: tanh by table

Each neuron has its own 128x8 table addressed by |Y| in sixteenths,
truncated and clamped at 127. Entry i therefore stands for tanh(i/16).

The table holds only the positive half of tanh (bit 7 of an entry is
ignored), and the sign of Y is put back onto the result. The table is
loaded, not built in. The intended content is round(16 * tanh(i/16)), which
gives 0, 1, 2, ... and reaches 16 (1.0) from i = 34 upwards.

The targets come from a 16x8 table per neuron, addressed by the `t_sel`
input (a training-pattern number).

## Using `nn_top`

1. Hold `rst_n` low, then high.
2. While `busy` is low, write the memories through the load port. Set
   `ld_we`, `ld_sel` (see `nn_pkg::mem_sel_t`: `MEM_X`, `MEM_W1A`,
   `MEM_W1B`, `MEM_W2A`, `MEM_W2B`, `MEM_TANH1/2`, `MEM_TGT1/2`), `ld_addr`
   and `ld_wdata`. Weight-memory A holds w and w + h as in the memory map;
   B needs only its markers.
3. Set `t_sel` and `err_goal`, and pulse `start`.
4. Watch `der`, `e_sum`, `eh_sum`, `iter`, `y1/y2` and `o1/o2`, which are
   updated each iteration. `busy` falls when training ends; `done` and
   `converged` then tell why.
5. Read weights back with `ld_sel`/`ld_addr` while idle; `ld_rdata`
   answers one clock later. This works for the stage-1 memories only.

Writes to the load port are ignored while busy. The tables can only be
written, not read back.

## Files

| file | contents |
|---|---|
| `rtl/nn_pkg.sv` | formats, widths, memory selector |
| `rtl/nn_top.sv` | the whole network |
| `rtl/stage1.sv` | memories, zero-byte detection and write protection, update, multipliers |
| `rtl/swap_ctrl.sv` | address timer and J-K swap flip-flop |
| `rtl/weight_update.sv` | w - dE/dw with clipping and minus-zero |
| `rtl/sm_mult.sv` | 8x8 sign-magnitude multiplier |
| `rtl/stage2_accum.sv` | positive/negative accumulators, Y |
| `rtl/stage3_error.sv` | tanh and target tables, squared error |
| `rtl/stage4_deriv.sv` | E, Eh, derivative, iteration count, stop |
| `rtl/sync_ram.sv` | single-port synchronous RAM |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. For example:

    verilator --binary --timing --assert -Irtl -y rtl rtl/nn_pkg.sv tb/tb_nn_top.sv \
              --top-module tb_nn_top -o sim && ./obj_dir/sim

`tb_nn_top` runs the network at its default parameters through three
training runs:

1. 50 iterations up to the limit.
2. A run stopped early by the error goal.
3. A run with inputs large enough to run off the end of the tanh table.

It checks every iteration's E, Eh, derivative, Y, o and stop decision
against an integer model of the rule. It also checks the final weight
memories and the 261-clock iteration period. It counts memory swaps,
zero-bytes, positive and negative products, negative sums, table clamping,
non-zero updates and both stop causes, and fails if any of them never
occurred.

The unit testbenches cover the following:

* the multiplier, exhaustively;
* the update, against all weights;
* each stage against values computed in the testbench.

## Where this differs from the original design, and what is assumed

* The clock is 100 MHz in effect: one memory word per clock, derived from
  the original memory timing. The pipeline is shorter than the original
  schematic's (261 clocks per iteration instead of about 272.5 to 293.5),
  and the delay chains are sized for this pipeline.
* The stage-3 divider is not built. The modified rule above makes it
  unnecessary, and removing it was the intended optimisation.
* These points were not specified and were chosen here:
  * how memories are loaded;
  * rounding of the derivative, and saturation of the weight update;
  * the minus-zero rule;
  * testing only neuron 1's word for the marker;
  * tanh table addressing (|Y| in sixteenths, truncated);
  * how targets are selected (`t_sel`);
  * the `err_goal` stop test on E;
  * clearing the derivative and the iteration count at `start`.
* The input memory is 256 words as specified, but only its lower half is
  used.
* Which half a result belongs to is carried as a tag with the data. The
  original used separate timers and delay flip-flops.
