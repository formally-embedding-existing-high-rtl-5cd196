# myg: a scheduled datapath built from high-level synthesis steps

This design is the register-transfer implementation of a small data-flow
function, `myg`, after the classic high-level-synthesis steps have been applied
to it: scheduling, register allocation, register binding, and allocation and
binding of functional units. The function

```
(x, y) = myg(a, b, c)
  p = a * b
  q = c + 1
  r = p * q
  s = b + c
  t = p - s
  x = r + t
  y = r * t
```

has seven operations. They are not given seven operators. They are spread over
four control steps (c-steps). The circuit has one multiplier, one
add/subtract/increment unit and four registers. The same datapath is wrapped
by two controllers, one for each way the circuit can talk to its
environment:

* **type A, self-starting**: the circuit never stops. It reads a new input
  every four cycles and presents the result three cycles later.
* **type B, event-driven**: the circuit waits for a `start` pulse, reports
  `busy` while it computes, and is ready again four cycles after `start`.

The point of the design is that every structural choice can be traced to one
synthesis decision: the schedule, the register binding or the functional-unit
binding. All of those decisions end up in one table, the control decoder.

## The schedule and the register binding

Only one multiplication and one add/sub/inc can happen per c-step. Under that
limit, four c-steps (0 to 3) is the minimum:

| c-step | multiplier | add/sub/inc unit | r1 after | r2 after | r3 after | r4 after | output |
|--------|------------|------------------|----------|----------|----------|----------|--------|
| 0 | idle | `s = b + c` (from the input) | `a` | `b` | `s` | `c` | |
| 1 | `p = r1 * r2` | `q = r4 + 1` | `p` | `q` | `s` (kept) | don't care | |
| 2 | `r = r1 * r2` | `t = r1 - r3` | `r` | `t` | don't care | don't care | |
| 3 | `y = r1 * r2` | `x = r1 + r2` | – | – | – | – | `(x, y)` |

Four registers are enough because the largest number of values alive across
a c-step boundary is four, after c-step 0. The binding is chosen so that no
value has to move from one register to another:

* `s` stays in r3 from c-step 0 to c-step 2.
* The multiplier always reads r1 and r2.

The input is needed only in c-step 0. The result is needed only in c-step 3,
where it comes straight out of the functional unit. Neither one has a
register of its own.

The "don't care" entries are fixed as follows:

* A register whose value is no longer needed keeps its value.
* An operand the schedule does not use is fed from a register.
  * The multiplier in c-step 0 reads r1 × r2, and its result is dropped.
  * The increment's unused second operand is r4.

## Datapath

`myg_datapath` is the classic mux–FU–mux–register loop:

```
 input (a,b,c) ──┐
                 ▼
   registers ─► operand_mux ×4 ─► functional_unit ─► register_mux ×4 ─► register_bank ─┐
       ▲         (left muxes)     (multiplier +      (right muxes)                     │
       └──────────────────────────  multipurpose) ───────────────────────────────────────┘
                                         │
                                         └─► (x, y) = (multipurpose result, product)
```

* `operand_mux` picks each of the four FU operands. The choices are one of
  r1..r4 or one of the input fields a, b, c.
* `functional_unit` holds one `multiplier` and one `multipurpose` unit. Both
  work in every c-step. The `multipurpose` unit does add, subtract or
  increment.
* `register_mux` picks each register's next value from these sources:
  * hold
  * input a, b or c
  * the product
  * the add/sub/inc result
* `register_bank` loads all four registers on a clock edge when `en` is high.
* `control_decoder` turns the c-step number into the control word for that
  step (`ctrl_word_t` in `myg_pkg`). The control word holds:
  * the four operand selects
  * the add/sub/inc operation
  * the four register selects
  * `out_valid`

Everything except the registers and the controller's state is
combinational. One c-step takes one clock cycle.

## Control: the two communication schemes

Time 0 is the first clock period after the synchronous, active-low reset
`rst_n` is released.

**Type A, `cstep_counter`.** This is a wrapping counter over c-steps 0..3, so
one evaluation takes four cycles:

* The input is sampled in cycles 4k (c-step 0).
* `(x, y)` is valid in cycles 4k+3 (c-step 3), together with `a_done`.

In general, with n the last c-step, the output of cycle (n+1)(k+1)−1 equals
myg of the input of cycle (n+1)k. Outside those cycles `a_x` and `a_y` show
intermediate values and must be ignored.

**Type B, `event_controller`.** This is a busy flag plus the c-step counter.
While idle it rests in c-step 0, and the registers are not loaded. If
`b_start` is high in a cycle t while `b_busy` is low:

* The input of cycle t is taken. Cycle t is c-step 0.
* `b_busy` is high in cycles t+1..t+3.
* `(x, y)` is valid in cycle t+3, flagged by `b_done`.
* `b_busy` is low again in cycle t+4. A new `start` may be given in that same
  cycle.

`b_start` while busy is ignored.

Assertions check these rules:

* In `event_controller`, idle implies c-step 0, and busy lasts exactly n
  cycles.
* In `myg_top`, the control table's output step agrees with the controller.

`myg_top` puts both circuits side by side. Each has its own ports, and both
share `clk` and `rst_n`.

| port | dir | meaning |
|------|-----|---------|
| `a_in_a`, `a_in_b`, `a_in_c` | in | type A input, sampled in c-step 0 |
| `a_x`, `a_y`, `a_done` | out | type A result, valid when `a_done` |
| `b_start` | in | type B start, honoured when not busy |
| `b_in_a`, `b_in_b`, `b_in_c` | in | type B input, sampled in the start cycle |
| `b_x`, `b_y`, `b_done`, `b_busy` | out | type B result, valid when `b_done`; busy flag |

## Number format

The function is defined over natural numbers. The hardware uses `WIDTH`-bit
unsigned words (default 32):

* `+`, `*` and the increment wrap modulo 2^WIDTH.
* `-` is truncated at zero: `d - e = 0` when `e > d`. This is the
  natural-number subtraction, and it makes `t = 0` whenever `a*b < b+c`.

The results match the mathematical function exactly as long as every
intermediate value fits in `WIDTH` bits.

## Where this RTL makes its own choices

These points are not fixed by the synthesis flow. They are decisions of this
implementation:

* **Data width.** The default is 32 bits, with wrap-around on overflow.
* **Subtraction.** It is truncated rather than modular, following the
  natural-number typing of the function.
* **Output order.** `x` is the add/sub/inc result and `y` is the product,
  following the equations (`x = r + t`, `y = r * t`).
* **Type B controller.** Only the behaviour of the event-driven scheme (busy,
  start and timing) is prescribed. The busy-flag-plus-counter circuit is the
  simplest one that meets it. Starts while busy are ignored.
* **Reset.** It is synchronous and active low. It clears the registers and
  puts both controllers in c-step 0. Type B starts not busy.
* **Don't-care values.** Unused operands and dead registers are handled as
  described above.
* **Encodings.** All select and operation encodings in `myg_pkg` are
  arbitrary.
* **Output path.** There is no output register. The result is valid only in
  the output c-step, flagged by `a_done` or `b_done`.

## Files

| file | content |
|------|---------|
| `rtl/myg_pkg.sv` | schedule length, register count, operation and select enums, control word struct |
| `rtl/multiplier.sv`, `rtl/multipurpose.sv` | the two operator units |
| `rtl/functional_unit.sv` | multiplier and multi-purpose unit together |
| `rtl/operand_mux.sv`, `rtl/register_mux.sv` | the muxes before and after the functional unit |
| `rtl/register_bank.sv` | registers r1..r4 |
| `rtl/myg_datapath.sv` | the complete datapath |
| `rtl/control_decoder.sv` | the schedule and binding table |
| `rtl/cstep_counter.sv` | type A controller |
| `rtl/event_controller.sv` | type B controller |
| `rtl/myg_top.sv` | both circuits side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
Each has a cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/myg_pkg.sv tb/tb_myg_top.sv \
          --top-module tb_myg_top -Mdir obj_tb_myg_top
./obj_tb_myg_top/Vtb_myg_top
```

Replace `myg_top` with any other module name to run its testbench. The
package must come first on the command line.

`tb_myg_top` runs both circuits at their default parameters for 2000
cycles:

* Type A gets new random inputs every cycle. Its output is compared with a
  reference model in every c-step 3, and `a_done` is checked in every cycle.
* Type B gets random `start` pulses, and a reference model of the busy/start
  rules runs next to it.

It counts how often each of these happened and fails if any never happened:

* back-to-back type A evaluations
* accepted starts
* idle cycles
* starts ignored while busy
* a start in the first cycle the circuit is free again
* a truncated subtraction
* a product that wraps

The block testbenches check the following:

* `tb_control_decoder` runs the control table on a behavioural model of the
  datapath. It checks the register contents after every c-step against the
  binding table above, and the final `(x, y)`.
* `tb_myg_datapath` plays the controller. It also checks that the registers
  hold while `en` is low.
* `tb_event_controller` and `tb_cstep_counter` check the c-step sequence and
  the busy and done timing cycle by cycle.

## Changing the design

* **Width.** Set `WIDTH` on `myg_top`. Everything below follows it.
* **Another schedule or binding, or another function on the same two units.**
  Rewrite the table in `control_decoder.sv`. Then set `MYG_N_CSTEPS` and
  `MYG_NUM_REGS` in `myg_pkg.sv` to the new number of c-steps and registers.
  The controllers, muxes and register bank are generic in these numbers.
  * If the binding needs register-to-register moves, add a source to
    `reg_src_t` and to `register_mux`.
  * For a different set of operators, extend `mp_op_t` and `multipurpose`, or
    the functional unit.
* **Check after any change.** `tb_control_decoder` shows whether a new table
  still computes the function. Its reference equations must then be changed
  too.
