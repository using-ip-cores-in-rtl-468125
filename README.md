# Clocked IP cores as synchronous-language modules

Synchronous languages (Esterel, Quartz and the like) compile a program into
modules that are started, aborted, suspended and pre-empted by their caller
through a small set of control signals. A hand-written or vendor IP core knows
nothing of this: it has a clock, perhaps a clock enable, a start strobe and a
ready flag. This design puts a thin wrapper around such a core so that, seen
from outside, it is indistinguishable from a compiled synchronous module. The
caller can then place the core anywhere in a program: in sequence with other
statements, inside a loop that restarts it in the very step in which it
finishes, under a `suspend`, or under a strong or weak `abort`.

The RTL contains:

* a generic wrapper for **combinational** cores;
* a generic control block for wrappers of **sequential** cores;
* a worked example: a 32-bit multi-cycle multiplier core, its wrapper, and the
  hardware of a small synchronous program that uses it in a loop to compute a
  dot product.

## The module interface every wrapper provides

Each module, whether compiled or wrapped, has the same control interface. The
structs are declared in `rtl/aif_pkg.sv`.

| Signal | Direction | Meaning |
|---|---|---|
| `go_surf`  | in  | run the module's combinational part ("surface") in this step |
| `go_depth` | in  | enter the module in this step (always implies `go_surf`) |
| `abrt`     | in  | abort the control flow that is inside the module |
| `susp`     | in  | freeze the control flow inside the module; wins over `abrt` |
| `prmt`     | in  | kill this step's data flow: the module assigns nothing |
| `inst`     | out | the module is instantaneous (combinational) |
| `insd`     | out | control flow rests inside the module (it was entered in an earlier step and has not finished) |
| `term`     | out | the module finishes of its own accord in this step |

One clock cycle is one macro step of the synchronous program. Strong
preemption is signalled by `abrt` or `susp` together with `prmt`; weak
preemption by `abrt` or `susp` alone, so the step's data actions still happen.

Output variables are shared between the module and the program around it. For
each output `y` the wrapper gets `y_in`, the value the surrounding program
would give it, and produces `y`. In each step exactly one party defines the
variable. The wrapper decides which one with a single select condition.

## Wrapping a sequential core

This is the heart of the design (`rtl/seq_wrapper_ctrl.sv`). One flip-flop,
`l`, records whether control flow is inside the module:

```
next(l) = go_depth | (l & ~(abrt | term)) | (l & susp)
insd    = l
inst    = 0
term    = l & rdy                    (0 for a core that never finishes)
define  = ~prmt & (insd | go_surf)   (core output drives y, else y_in)
ce      = ~susp                      (core clock enable)
rst     = go_depth                   (core restart)
```

How to read it:

* **Entering.** `go_depth` sets `l` and restarts the core in the same step.
  In that step the core's outputs already define `y`, because `go_surf` is
  high.
* **Running.** While `l` is set, the core's outputs define `y` unless the step
  is pre-empted (`prmt`).
* **Finishing.** The core's ready flag, seen while `l` is set, is the module's
  `term`. `l` drops at the end of that step. It stays set only if `go_depth`
  enters the module again in the same step. Restarting in the terminating step
  is legal only if the core registers its inputs, as the multiplier does.
  Otherwise the compiler would need a second copy of the core. The package
  records this as two attributes, `dupEnd` and `dupAny`, both false for the
  multiplier.
* **Aborting.** `abrt` clears `l`, unless the module is also suspended.
* **Suspending.** `susp` keeps `l` and turns the core's clock enable off, so
  its state is frozen. Its outputs still define `y`, so a core with
  combinational outputs still follows its inputs. This is also how a weak
  suspend is handled: the core's state is held, and its combinational response
  is left alone. A core without a clock enable cannot be placed under a
  `suspend`.
* **Reset.** The module-level `rst` only clears `l`. The core itself is brought
  into a known state each time the module is entered, so the synchronous
  program never sees a reset.

A core that has no ready flag can still be wrapped. Set `RDY_COUNT` to its
latency in steps. The wrapper then counts the unsuspended steps since entry,
and `term` rises in the `RDY_COUNT`-th step after entry. In that case
`core_rdy` is ignored.

`term = l & rdy` holds even in a suspended step. A caller that suspends the
module ignores it in that step, and `term` shows again when the suspension
ends. `TERMINATES = 0` gives the variant for cores that never finish.

## Wrapping a combinational core

A combinational core has no clock, so control never rests inside it.
`rtl/comb_wrapper.sv` outputs constants `inst = 1`, `insd = 0` and
`term = 0`, and selects `y = go_surf ? y_core : y_in`. The core's inputs go to
it directly. The core itself is not part of this RTL: in the top level its
result enters on `comb_y_core`. The testbenches use a 16 x 16 combinational
multiplier in its place.

## The example multiplier

`rtl/seq_multiplier.sv` is a non-pipelined core with registered inputs and
outputs. Its ports are `clk`, `ce`, `valid`, `a`, `b`, `y` and `rdy`.
`valid` registers new factors and drops any multiplication still running.
It then shifts and adds one bit of `b` per enabled clock. After `W` additions
the low `W` bits of the product go to `y` and `rdy` rises. `rdy` and `y` hold
until the next `valid`.

**Latency:** `valid` in step t gives `rdy` in step t + W + 1, which is 33 steps
at the default W = 32. Only steps with `ce` high count.

`rtl/multiplier_module.sv` is the wrapped core: `seq_wrapper_ctrl` plus the
core plus the `y` multiplexer. The core's `valid` is the wrapper's core-restart
output (`go_depth`), and its `ce` is `~susp`.

## The example program: a dot product by repeated calls

`rtl/dot_product_prog.sv` is the hardware of this synchronous program:

```
sum = 0; i = 0;
while (i < n) { Multiply(A[i], B[i], P); next(sum) = sum + P; i = i + 1; }
```

It is itself a module with the control interface above. It is built from the
following state:

* `l_prog`, which means "inside the loop, a multiplication call is running";
* the index `i_reg`;
* `sum_reg`.

The program works as follows:

* **Entry step.** `sum` reads 0 in this step, because `sum = 0` is an
  immediate assignment. If n > 0, the multiplier module is entered with A[0]
  and B[0]. If n = 0, the program terminates in the same step.
* **Step in which the multiplier module terminates.** The rest of the loop body
  runs in that same step. P is added to `sum` for the next step and `i`
  advances. If the new `i` is still below n, the multiplier module is entered
  again at once with A[i] and B[i]. The last step of one call is thus the first
  step of the next, and one multiplier suffices.
* **Last product.** When the new `i` reaches n, `term` is raised in that step.
* **Preemption.** `abrt`, `susp` and `prmt` go unchanged to the multiplier
  module. The program's own state reacts as follows:

  | Input | Effect on the program |
  |---|---|
  | `abrt` | `l_prog` clears and no new call starts. With `prmt` low (weak abort), a product arriving in that step is still added. With `prmt` high (strong abort), it is lost. |
  | `susp` | The loop is frozen. A suspended step runs no loop-body actions. |
  | `prmt` alone | The product of that step is not added. The index still advances. |

**Timing:** entered in step t, the program terminates in step t + n*(W+1)
plus the number of suspended steps. Its final `sum` is then
Σ A[i]*B[i] mod 2^W.

## Hierarchy and files

```
sync_ip_top                     top: both wrapped modules side by side
├── dot_product_prog  u_prog    example program (control interface on prog_ctrl_*)
│   └── multiplier_module u_mult
│       ├── seq_wrapper_ctrl u_ctrl
│       └── seq_multiplier   u_core
└── comb_wrapper      u_comb    wrapper for an external combinational core
aif_pkg                         control-interface structs, dupEnd/dupAny attributes
```

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `W` | 32 | top, program, multiplier | data width of factors, product and sum |
| `N_MAX` | 16 | top, program | size of arrays A and B; larger `n` is clamped |
| `CW` | 32 | top | width of the combinational module's output |
| `TERMINATES` | 1 | `seq_wrapper_ctrl` | 0 for a core that never finishes |
| `RDY_COUNT` | 0 | `seq_wrapper_ctrl` | 0: end on the core's ready flag; N > 0: end N unsuspended steps after entry |

All logic is synchronous to `clk`. `rst` is active high and synchronous.
Inputs are sampled at the rising edge that ends a step.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one ends with a
line `TB_RESULT checks=N failures=M`. Each one also has a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert --top-module tb_sync_ip_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/aif_pkg.sv tb/tb_sync_ip_top.sv
./obj_dir/Vtb_sync_ip_top
```

Replace `tb_sync_ip_top` with `tb_dot_product_prog`, `tb_multiplier_module`,
`tb_seq_wrapper_ctrl`, `tb_seq_multiplier` or `tb_comb_wrapper` to run one
block.

* `tb_sync_ip_top` runs the whole design at its default sizes. It counts each
  mechanism and fails if one never occurs. The mechanisms are:
  * restart in the terminating step;
  * suspended steps;
  * strong and weak aborts;
  * an empty loop;
  * both selections of the combinational wrapper.
* `tb_multiplier_module` and `tb_seq_wrapper_ctrl` compare every step against
  a step-by-step reference model kept in the testbench. The reference
  model is fed random control inputs.

Assertions in the RTL check:

* `go_depth` implies `go_surf`;
* the program is not entered while suspended;
* the multiplier is restarted only in a step in which it terminates.

## What is fixed and what is a choice here

The following are taken as given:

* the control and data interfaces;
* the sequential-wrapper equations;
* the combinational wrapper;
* the multiplier's port list and 32-bit width;
* its registered inputs and outputs;
* the dot-product loop, including restarting the multiplier in its terminating
  step with a single core.

These are choices of this design:

* **Clock-enable polarity.** The core's clock enable is `~susp`, so suspension
  freezes the core. One printed form of the wrapper connects `susp` without
  the inversion, which would run the core only while it is suspended.
* **Multiplier internals.** The core is a radix-2 shift-and-add unit with
  latency W + 1. It keeps the low W bits of the product, and `valid` acts only
  while `ce` is high. Any core with the same ports, registered inputs and a
  ready flag can take its place: the wrapper does not depend on the latency.
* **Loop state.** The program is translated into registers as described above.
  P reads 0 outside the multiplier's steps. `i = i + 1` is seen by the loop
  test in the same step.
* **Program preemption.** The program responds to abort, suspend and `prmt`
  as given in the preemption table above.
* **Sizes.** `N_MAX = 16`, with larger `n` clamped. `sum` wraps modulo 2^W.
* **Struct packing.** The control signals are packed into structs.
* **Compile-time attributes.** `dupEnd` and `dupAny` are checked at
  elaboration; no second core instance is ever built.
