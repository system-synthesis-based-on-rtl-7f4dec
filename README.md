# Bounded FIFO with parallel inputs, derived as a Moore machine

This is a small buffer from the cell path of an ATM switch: a FIFO that
accepts **up to four items per clock cycle** and delivers **at most one item
per clock cycle**, with room for **eight items**. What makes it interesting is
how it is structured. It is written as the direct hardware reading of a
functional specification: the FIFO state is a *bounded list*, one pure
function computes the next list, another computes the output from the list,
and a register holds the list between cycles. In other words it is a
Moore-type state machine whose next-state decoder and output decoder are the
two functions of the specification.

## Timed signals

Time is divided into *event cycles*, one per rising edge of `event_clk`. In
every event cycle a signal either carries a value (a *present* event) or
carries nothing (an *absent* event). In hardware a timed signal is a value plus
an `is_present`-style flag:

| signal       | meaning                                                     |
|--------------|-------------------------------------------------------------|
| `in_present` | the input event of this cycle is present                    |
| `in_number`  | how many items the input list holds (0..4)                  |
| `in_items`   | the input list, `in_items[0]` enters the buffer first       |
| `out_present`| the output event of this cycle is present                   |
| `out_value`  | the item delivered in this cycle (0 when absent)            |

So the input is a *timed list of items* and the output a *timed item*.

## The bounded list

The state is a record `{number, item[0..7]}`: `number` counts the valid
items, `item[0]` is the head (the oldest item) and `item[number-1]` the
newest. Slots at and above `number` are unused and are kept at zero. Reset
puts the FIFO into the empty list (`number = 0`), which is the machine's
initial state.

## The two functions

**Output decoder** (`fifo_output_decoder`): an empty list gives an absent
output; otherwise the output is present and carries `item[0]`.

**Next-state decoder** (`fifo_next_state_decoder`): the cases are

| current list | input          | next list                     |
|--------------|----------------|-------------------------------|
| empty        | absent         | empty                         |
| empty        | present `ys`   | `ys`                          |
| `x : xs`     | absent         | `xs`                          |
| `x : xs`     | present `ys`   | `xs ++ ys`                    |

and then both lists are *cut* to their bounds: `ys` to its first four items
and the result to its first eight. Two consequences are worth stating
plainly:

* The head leaves the buffer in every cycle in which the buffer is non-empty,
  because that is the cycle in which the output decoder shows it. There is no
  ready/valid handshake and no back-pressure: the consumer must take one item
  per cycle whenever `out_present` is high.
* There is no "full" signal either. When more items arrive than there is room
  for, the newest ones are silently dropped. Sizing the buffer so that this
  does not happen in the system is the designer's job (the eight-item size was
  chosen by simulating the switch model).

A present input with an empty list behaves like an absent input. An
`in_number` above 4 is treated as 4.

## Timing

```
edge k        edge k+1       edge k+2
  |  inputs A   |              |
  |  sampled ---+-> A in buf   |
  |             |  out = A  ---+-> A removed
```

Items on the inputs at a rising edge are in the buffer after that edge. An
item written into an empty FIFO is on the output during the next event cycle
(one cycle latency). The output is a function of the registered state only,
so it changes only after a clock edge or reset. Throughput is one item out per
cycle and up to four in.

## Modules

| module                     | role                                                          |
|----------------------------|---------------------------------------------------------------|
| `fifo_pkg`                 | default sizes: `BUFFER_SIZE = 8`, `MAX_INPUTS = 4`, `DATA_W = 8` |
| `fifo_next_state_decoder`  | combinational next bounded list                               |
| `fifo_output_decoder`      | combinational output event from the state                     |
| `state_register`           | generic state register with asynchronous active-low reset to `INIT` |
| `constrained_fifo`         | top: the three parts wired as a Moore machine                 |

`constrained_fifo` has parameters `B` (buffer items), `I` (parallel inputs)
and `W` (item width); the count widths follow from them. The default
configuration holds 68 bits of state (4-bit count plus 8 x 8-bit items).
Two concurrent assertions in the top state that the count never exceeds `B`
and that `out_present` is high exactly when the buffer is non-empty.

## What is the design's own choice

The buffer size, the number of parallel inputs, the parallel-input
architecture, the Moore structure, the state record and the behaviour of the
two functions follow the specification this FIFO comes from. The following are
choices made here where it is silent:

* **Item width** of 8 bits. The specification keeps the item type generic.
* **Reset** is asynchronous and active low. Only "the initial state is the
  reset state" is given.
* **Empty buffer with absent input** stays empty. That case is left unlisted
  in the specification.
* **Overflow** drops the newest items. This is one reading of "the lists are
  cut".
* **Output timing**: the output comes from the registered state, one cycle
  after an item is written. The Moore-machine structure requires this. A
  purely equational reading of the underlying skeleton would instead show
  the new state in the same cycle.

An alternative architecture that takes the four items serially on a clock four
times faster than the event clock was considered for this FIFO but not
chosen, and is not included. The surrounding ATM switch blocks (OAM
extraction and generation, cell handlers, switch tables, stream merging) are
not part of this RTL.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_fifo_next_state_decoder`: all count/present/`in_number` combinations
  (including oversized `in_number`) with random items, against a queue model.
* `tb_fifo_output_decoder`: every count with random item arrays.
* `tb_state_register`: asynchronous reset, load on each edge, hold between
  edges.
* `tb_constrained_fifo`: the full design at default sizes for about 2,400
  cycles, with light, heavy and bursty random traffic. A cycle-accurate queue
  model checks every output cycle. The test counts, and requires at least one
  of each: absent input, present empty list, 1, 2, 3 and 4 items at once, an
  oversized list cut to four, empty buffer, full buffer, dropped items, and
  the one-cycle path from an empty buffer to the output.

Run one with Verilator, for example:

```
verilator --binary --timing --assert --top-module tb_constrained_fifo \
    rtl/fifo_pkg.sv rtl/fifo_next_state_decoder.sv rtl/fifo_output_decoder.sv \
    rtl/state_register.sv rtl/constrained_fifo.sv tb/tb_constrained_fifo.sv
./obj_dir/Vtb_constrained_fifo
```

For reference, a manual and a generated gate-level implementation of this
FIFO at 20, 40 and 50 MHz were reported at about 645 to 760 gates in an older
gate library. Coarse synthesis of this RTL gives 68 flip-flops and about 170
word-level cells; the two figures are not directly comparable.
