# Context-switched finite state machine: a traffic light on one counter

A controller often contains several small state machines of the same kind
that never work at the same time. A traffic light, for example, needs a
counter that steps through the phases of the crossing, a long timer for the
green/red phases and a short timer for the yellow and all-red phases. Built
directly, that is three counters, each with its own register and next-state
logic.

This design keeps **one** counter and treats each task as a *context*. The
value of every context lives in a row of a small memory. When the controller
switches tasks, the counter's value is left in the memory row of the
outgoing context and the counter is loaded for the incoming one. The main loop
resumes where it stopped, and a timer restarts from its full time. On an FPGA
this moves state from scarce flip-flops into block or distributed RAM, and
the next-state logic is built only once.

The RTL implements the idea for a two-way crossroad with the following
contexts:

| context | task                        | direction | on switch-in                |
|---------|-----------------------------|-----------|-----------------------------|
| 0       | main loop, states a0..a5    | up        | resumes from its memory row |
| 1       | 59-second timer (red/green) | down      | restarts from 59            |
| 2       | 5-second timer (yellow, all red) | down | restarts from 5             |

## The crossroad

Light 1 (R1 Y1 G1) faces North-South and light 2 (R2 Y2 G2) faces East-West.
The main loop has six states. Each state is followed by one timer:

| state | North-South | East-West | timer after it |
|-------|-------------|-----------|----------------|
| a0    | red         | green     | 59 s (ctx 1)   |
| a1    | red         | yellow    | 5 s (ctx 2)    |
| a2    | red         | red       | 5 s (ctx 2)    |
| a3    | green       | red       | 59 s (ctx 1)   |
| a4    | yellow      | red       | 5 s (ctx 2)    |
| a5    | red         | red       | 5 s (ctx 2)    |

After a5 the loop starts again at a0. While a timer runs, a display shows the
remaining seconds as two decimal digits.

## Structure

```
                 +-------------------- ctx_counter ---------------------+
 i_en (tick) --> |                                                      |
                 |  load value   +----------------+      ctx_mem        |
 ctx_sequencer   |  mux -------> | updown_counter | --+-> row[ctx] <= cnt|
  (FSM +         |  0 / row /    +----------------+   |   (write port)   |
   switching     |  CTX_INIT           o_cnt          |                  |
   matrix)  ---->|  ctx, load, zero, dir, en          |   row[ctx] ----> o_data
     ^           |                                    |   row[0]   ----> o_view
     |           +------------------------------------|------------------+
     |  o_cnt, o_rdy, o_data                          |          |
     +------------------------------------------------+          |
                                  o_cnt (timer contexts)          | row 0 (main state)
                                           v                      v
                                    tl_time_display          tl_lamp_logic
                                    (BCD, blanking)          (lamp table)
```

| module            | role |
|-------------------|------|
| `ctx_pkg`         | lamp struct `lamp_t`, sequencer phase enum `phase_t`, crossroad constants |
| `updown_counter`  | N-bit synchronous up/down counter, enable, asynchronous reset and load (behavioural, the default) |
| `updown_counter_tff`, `tff` | the same counter built from T flip-flops with asynchronous set/clear (option) |
| `ctx_mem`         | 2**A_SIZE x W_SIZE memory, synchronous write with chip select, asynchronous read, second read port, cleared by reset |
| `ctx_counter`     | counter plus context memory: the shared datapath |
| `ctx_sequencer`   | FSM that chooses the context and holds the switching matrix (state -> timer context) |
| `tl_lamp_logic`   | output logic of context 0: main state -> six lamps |
| `tl_time_display` | output logic of the timer contexts: remaining seconds -> two BCD digits |
| `tl_ctx_top`      | the controller: all of the above wired together |

## How a context switch works

This is the part that needs the most care, and every timing choice in the
sequencer comes from it.

**Write-back.** On every clock edge where the counter is not being loaded,
`ctx_counter` writes the counter value into the row of the active context.
The row therefore follows the counter one clock behind. A context's final
value is saved only if the context stays active for one clock after its last
count. The sequencer guarantees this:

* after the main loop steps, it stays in context 0 for one more clock
  (`PH_HOLD`), which writes the new state into row 0;
* a timer leaves only in the clock where its count is already 0, and that
  clock writes 0 into its row.

**Load.** The counter's load is asynchronous, so the sequencer drives `load`,
`zero` and `ctx` straight from flip-flops: no glitch can reach the load pin.
Each load pulse is exactly one clock long and covers one rising edge. Because
the load also acts on that edge, the counter ends up holding the selected
value even if the asynchronous load has sampled the data before the new
context number settled. No row is written while the load is high. During the
load clock the counter is not yet reliable. So in that clock the sequencer
reads the saved main state from the memory (`o_data`) rather than from the
counter to decide whether to wrap.

**Load value.** On a switch the counter takes:

* 0, if `i_zero` is high (the a5 -> a0 wrap);
* the context's own memory row, if its bit in `CTX_RESUME` is set (context 0);
* `CTX_INIT[ctx]` otherwise (59 or 5).

**One round, cycle by cycle.** With `i_en` high on every clock:

```
clock   phase        ctx  counter         memory writes
  0     PH_RESTORE    0   <- row0 = s     -
  1     PH_RUN        0   s -> s+1        row0 <- s
  2     PH_HOLD       0   s+1             row0 <- s+1   (lamps change at its end)
  3     PH_RESTORE    T   <- 59 or 5      -             T = MATRIX[s+1]
  4..   PH_RUN        T   counts down     rowT <- cnt
  ...   PH_RUN        T   0 (o_rdy)       rowT <- 0     -> back to PH_RESTORE, ctx 0
```

If s is 5, `PH_RUN` in clock 1 is replaced by `PH_WRAP`, which loads 0. Reset
puts the sequencer in `PH_HOLD` with context 0 and the counter at 0, so the
first action is the 59-second timer of a0.

Timer counting is gated by the tick `i_en`: the timer decrements only in
clocks where `i_en` is high and the count is not 0. With `i_en` high on
every clock, state a0 lasts 59 + 5 clocks and a 5-second state 5 + 5 clocks;
with a slower tick a state lasts until its 59th (or 5th) tick plus 5 clocks. The main-loop steps do not wait for a tick.

**Outputs that survive a switch.** The lamps are decoded from memory row 0
through the memory's second read port, not from the counter. They keep
showing the current state while a timer uses the counter, and they change
at the clock edge that writes the new state back. The display shows the
counter only while a timer context is in `PH_RUN`, and is blank otherwise.

## Top-level interface (`tl_ctx_top`)

| port      | dir | width | meaning |
|-----------|-----|-------|---------|
| `i_clk`   | in  | 1     | clock |
| `i_rst`   | in  | 1     | asynchronous reset, active low |
| `i_en`    | in  | 1     | timer tick (e.g. one clock per second); tie high to count every clock |
| `o_ns`    | out | `lamp_t` | North-South lamps {r, y, g} |
| `o_ew`    | out | `lamp_t` | East-West lamps {r, y, g} |
| `o_tens`, `o_ones` | out | 4 each | remaining seconds, BCD |
| `o_blank` | out | 1     | display off (no timer running) |
| `o_state` | out | N     | main state a0..a5 as saved in row 0 |
| `o_cnt`   | out | N     | shared counter |
| `o_ctx`   | out | CTX_W | active context |
| `o_rdy`   | out | 1     | counter is 0 |
| `o_data`  | out | N     | memory row of the active context |
| `o_phase` | out | `phase_t` | sequencer phase |

Parameters: `N = 6` (counter and row width; 59 needs 6 bits), `CTX_W = 4`
(context number width, so 16 memory rows), `MATRIX` (the switching matrix,
one context number per state a0..a5, default 1, 2, 2, 1, 2, 2) and
`TFF_COUNTER` (0: behavioural counter, 1: T flip-flop counter). The block-level parameters are:
`ctx_counter.CTX_INIT` and `CTX_RESUME`, `ctx_sequencer.MATRIX` (the
switching matrix, one context number per main state) and `NSTATES`, and
`ctx_mem.A_SIZE` / `W_SIZE` (defaults 4 / 8 when used alone).
`updown_counter.N` defaults to 4 when used alone.

## Where this follows the article and where it does not

Taken from the article:

* the three contexts, their count directions and the 59 s / 5 s times;
* the six-state lamp sequence;
* the single shared up/down counter with asynchronous reset and load;
* the memory with chip-select write and asynchronous read;
* the signal names and widths of the counter's reference simulation
  (6-bit count, 4-bit context number, `o_rdy`, `o_data`);
* resume of the main loop and restart of the timers.

Choices made here:

* **Switching matrix.** The article's state graph gives the 59 s timer to
  a0 and a3 (the green phases) and 5 s to the rest; that is what `MATRIX`
  holds. Its block diagram prints a different example table (state 0..5 ->
  1, 2, 1, 1, 2, 1). Set the top's `MATRIX` parameter to use that one.
* **Memory depth.** The memory has 2**A_SIZE rows, with A_SIZE the number of
  address bits. Reset clears every row. The second read port is added for
  the lamp logic.
* **Sequencer.** The phase sequence, the extra write-back clock, the wrap
  by loading 0, the `i_zero` input and the `CTX_RESUME` mask are this
  design's own. The article only states that the context is saved, restored
  and switched by a context table.
* **Display and ready flag.** The display format (two BCD digits,
  blanking) and the meaning of `o_rdy` (counter at 0) are chosen here.
* **Counter style.** The default counter is written behaviourally. The
  article prefers that style to a gate-level circuit. The gate-level form
  (`updown_counter_tff`) is a chain of T flip-flops. Each bit toggles when
  the counter is enabled and all lower bits are 1 (counting up) or all 0
  (counting down). Loading sets a flip-flop whose data bit is 1. Clearing a
  flip-flop whose data bit is 0 is added here, so that any value can be
  loaded. Select this form with `TFF_COUNTER = 1`.

Not part of this RTL: the stackless interrupt scheme and the single-layer
neural network that the article mentions as other uses of context switching,
and the FPGA's block RAM primitive. The memory is a plain array that
synthesis may map to RAM.

## Synthesis notes

Both counters have registers with an asynchronous clear *and* an
asynchronous load of data, as the article's counter specifies
(`updown_counter_tff` expresses it as asynchronous set and clear per bit).
Yosys with its slang front end rejects two asynchronous controls on one
register, so the counters and the modules above them do not go through that
flow as written; the memory, sequencer and output logic do. If your flow
has the same limit, make `i_load` a synchronous load. The sequencer already
holds the load across a clock edge and reads nothing from the counter in
that clock, so the controller behaves the same, clock edge by clock edge. Lint reports the load net as used both asynchronously and
synchronously (it also blocks the memory write), which is intended.

## Simulation

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<m>`:

| testbench | what it checks |
|-----------|----------------|
| `tb_updown_counter` | random count/load against a model; asynchronous load and reset; reset over load |
| `tb_updown_counter_tff` | the same checks for the T flip-flop counter |
| `tb_ctx_mem` | reset clear, chip select, both read ports against a model |
| `tb_ctx_counter` | the reference switching sequence (0 -> 59 -> resume -> 5), then random switching against a model of counter and rows; both counter styles in lockstep |
| `tb_ctx_sequencer` | closed loop with a modelled datapath and random ticks: matrix lookups, timer lengths in ticks, control outputs per phase, wrap |
| `tb_tl_lamp_logic` | all 64 state codes |
| `tb_tl_time_display` | all counter values, active and blank |
| `tb_tl_ctx_top` | the full controller at default parameters for two rounds. It checks the lamp order, the 59/5-tick durations, the display countdown, and that lamps only change in context 0. It counts every mechanism (switch, resume, restart, expiry, wrap, waiting for a tick). |
| `tb_tl_ctx_top_tff` | the same with `TFF_COUNTER = 1` |

Run one with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -y rtl --top-module tb_tl_ctx_top \
    rtl/ctx_pkg.sv tb/tb_tl_ctx_top.sv
./obj_dir/Vtb_tl_ctx_top
```

`-y rtl` lets Verilator find each module in `rtl/<module>.sv`; the package is
named first because modules import it. Any other testbench runs the same
way with its own name. Verilator simulates two-state, and every
register that is read is reset.
