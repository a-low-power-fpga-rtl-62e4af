# Self-adaptive multi-voltage asynchronous FPGA

An asynchronous FPGA can lower the supply voltage of any logic block that is not on the critical
handshake loop, and then save power without losing throughput. Every logic block finds out for
itself whether it may do this. The datapath is dual-rail, so each block knows when its result is
ready (`ack`). The next pipeline stage's request (`req`) acts as the deadline. If `ack` would still
beat `req` after the extra delay that the low supply adds, the block switches its logic to the low
supply. No offline timing analysis is needed. Only the block's logic moves to the low supply. Its
handshake circuits stay at the high supply, and domino buffers carry the low-swing signals
across, so no level converters are needed.

This repository holds synthesizable SystemVerilog for that fabric: the logic block with its
voltage controller, the dual-rail LUT, the handshake gates, the routing and the configuration
memory. The real circuit is self-timed and partly analog, so the RTL models time in discrete
steps (see *Time in steps*). This makes the design simulatable with Verilator, and it can also be
emulated on a conventional clocked device.

## Dual-rail words and the four-phase handshake

Each bit travels on two wires (`sa_pkg::dr_t`, rails `t` and `f`):

| value  | (t, f) |
|--------|--------|
| data 0 | (0, 1) |
| data 1 | (1, 0) |
| spacer | (0, 0) |

(1, 1) is never used. A spacer separates every pair of data words. A receiver sees a word
arrive from the rails alone, however long the wires are.

Between two stages the handshake uses one request wire running backwards. `req = 1` asks the
previous stage for data and `req = 0` asks it for the spacer. Each block has a C-element whose
inputs are its own `ack` (the OR of its result rails) and the `req` from the next stage. The
C-element's output changes only when both inputs agree. That moment is the *start point* of a
phase:

* The output falls when the spacer is ready and the next stage wants a spacer. The block then
  asks its predecessors for new data (`req_out = 1`) and shows the spacer on its output.
* The output rises when data is ready and the next stage wants data. The block then shows the
  data word and asks its predecessors for the spacer.

A phase therefore lasts until the later of two arrivals: the block's own `ack` (its predecessor's
handshake delay plus its logic delay) and the next stage's `req` (that stage's delays). If `ack`
comes first, the block waits, and the length of that wait is its slack.

## How a block decides its own supply (`sa_controller`)

Running the block's logic at VDDL instead of VDDH makes it slower by some delay Δt. As long as
Δt is less than the slack, `ack` still arrives before `req`, and the pipeline cycle does not change.

The controller carries out that comparison directly:

1. A domino buffer passes `ack` to a delay element of Δt. The delay element has the same delay
   as the extra delay of the low-voltage domain (parameter `DT`).
2. A domino AND combines the delayed `ack` with the inverted `req`. It fires if the delayed `ack`
   arrives while `req` is still 0. In that case the block has at least Δt of slack, and it
   switches to VDDL at once (`vdd_low = 1`).
3. Once fired, the domino AND stays fired for the rest of the enable pulse. A block that has
   moved to VDDL is not re-measured at the new, slower timing, so it cannot oscillate between
   the two supplies.
4. A latch follows the decision while `enable` is high and holds it after `enable` falls. At that
   point the controller stops switching. A new enable pulse starts a new assignment, and every
   block first returns to VDDH.

Details that matter when you use or change the controller:

* **Evaluation window.** The ack buffer evaluates only from the start of a data phase (`ack` and
  `req` both 0) until `req` rises. An `ack` that is still high from the previous phase, or that
  falls late in a spacer phase, is never counted as early.
* **Data phase only.** Only the rising `ack`, that is the data phase, is measured. The design
  assumes that the spacer phase has similar slack.
* **Ties.** If the delayed `ack` and `req` arrive in the same step, the block stays at VDDH.
  A block with exactly Δt of slack would lose nothing at VDDL, so this rule is conservative.
* **When to pulse `enable`.** Raise `enable` only while the mapped circuit runs at its steady
  rate, and keep it high for several pipeline cycles. The choice is only as good as the traffic
  seen during the pulse. If the producers or consumers later become faster than they were during
  the pulse, a block at VDDL can become critical.
* **Adjacent blocks.** Two blocks in a row can both use the same slack. In the test pipelines
  this did not lengthen the cycle, but the scheme does not rule it out in general.

## The logic block (`logic_block`)

```
 din[4] ─► dr_lut4 ─► mv_domain_delay ─┬─► OR ─────────── ack ──► C ◄── req_in
 (dual-rail)           (T_MV or         │                          │
                        T_MV+DT steps)   └─► rs_latch ─► q/qn ─►  domino buffers ─► dout
                                                                   ▲ pc = C output
 req_out = ~C ◄────────────────────────────────────────────────────┘
 sa_controller(enable, ack, req_in) ─► vdd_low ─► supply of the domain
```

* **Multi-voltage domain:** the LUT, the OR gate and the RS latch. Their combined delay is
  `T_MV` steps at VDDH and `T_MV + DT` steps at VDDL (`mv_domain_delay`, a behavioural timing
  model of the effect of the supply).
* **VDDH domain:** the C-element, the request inverter, the domino buffers and the controller.
  The domino buffers are precharged by the C-element's output. While it is 0 the output is the
  spacer. While it is 1 the output is the word held in the RS latch. The latch lets the block
  keep driving its result after its inputs have gone back to the spacer.
* **LUT input completeness.** `dr_lut4` produces data only when every input is data. It returns
  to the spacer only when every *used* input (`in_used`) is a spacer again. Because `ack` is only
  the OR of the LUT's two rails, the LUT must itself wait for all of its inputs. Otherwise a block
  fed by two paths of different length, for example `x3 = x2 & x0` where `x2` also depends on `x0`,
  would combine the new word from one path with the old word from the other. Unused inputs are
  tied to constant data 0 by the routing and are left out of the spacer test.

Latency at an idle, requesting output is `T_MV + 1` steps at VDDH and `T_MV + DT + 1` at VDDL: the
domain's delay plus the C-element's step.

## The fabric (`sa_fpga`, `routing`, `cfg_sram`)

The top level is a `ROWS x COLS` array of cells, by default 4 x 4. Each cell is a logic block with
its controller, plus `NPI` dual-rail input pads. All controllers share one `enable` input. Each
block reports its supply choice on `vdd_low[i]`.

Each routing line has three wires: two rails forward and a request backward. The routing block
provides what the connection and switch blocks provide, without their geometry:

* Each LUT input picks its source with `in_sel`: 0 for constant data 0 (an unused input),
  `1..NPI` for an input pad, and `NPI+1+i` for the output of block `i`. Every source can reach
  every input; it is a full crossbar.
* Block `i`'s output reaches its readers `hops` steps later, and their requests return after the
  same delay. This stands for a route through `hops` programmable switches.
* When a line has several readers, a C-element joins their requests, so the source moves on only
  when all readers have asked. When `pad_out` is set, the output pad's request (`po_req[i]`) joins
  in too. A source with no reader sees a constant request of 1.

Configuration word per cell (`sa_pkg::lb_cfg_t`): a 16-bit truth table (`lut[m]` is the output for
input value `m`, with input 0 as bit 0), four 5-bit input selects, a 3-bit hop count and
`pad_out`.

To program the fabric, hold `rst_n` low and write every cell once through
`cfg_we/cfg_addr/cfg_wdata`. The memory has no reset, like SRAM. Then release `rst_n`. Every
handshake starts in the spacer state and asks its input pads for data.

Pad protocol, seen from outside: an input pad is given data while `pi_req` is 1 and the spacer
while it is 0. An output pad's consumer sets `po_req` to 0 after it has taken a word, and back to
1 after it has seen the spacer.

## Time in steps

Every gate that holds state (C-element, RS latch, domino keeper, LUT hold, controller latch) is a
flip-flop on `clk`, and each flip-flop is one step. All other gates are combinational. Delays that
come from the real circuit's analog behaviour are given in steps:

| parameter | default | meaning |
|---|---|---|
| `T_MV` | 4 | delay of the multi-voltage domain at VDDH |
| `DT` | 2 | extra domain delay at VDDL; also the controller's delay element |
| `hops` (config) | 0..7 | routing delay of a block's output and of its request |

The defaults were chosen to match the published evaluation. That evaluation gives a single
logic block 500 ps per data set at VDDH (1.2 V) and 665 ps at VDDL (1.0 V), a ratio of 1.33. In
this model the same block, between a producer and a consumer that answer at once, takes 12 steps
at VDDH and 16 at VDDL, a ratio of 1.33 with one step of about 41.7 ps. The model does not cover
the energy figures (0.142 pJ and 0.109 pJ per data set), transistor counts or the short-circuit
protection of the domino interface.

## Where this RTL departs from the published design

* **Routing.** The connection and switch blocks are modelled by what they connect and how long
  their routes take, as a full crossbar. Channel width, segment lengths and switch patterns were
  not specified, so the island-style track structure is not modelled.
* **Request join.** Joining the requests of several readers with a C-element is this design's own
  choice.
* **LUT hold.** The LUT's hold until all used inputs are spacers, and the `in_used` mask, are this
  design's own choices. They make the OR-based completion signal safe.
* **Controller details.** The evaluation window, the measurement of the data phase only, the
  "fire once per pulse" behaviour and the tie rule are this design's reading of the controller.
* **Voltage selector.** The selector (a MUX between VDDH and VDDL) is analog and is not modelled.
  Its select signal is `vdd_low`, and its effect is the domain delay.
* **Array size and pads.** The array size, the number of pads, all field widths and the
  configuration port are this design's own choices.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`, and a watchdog ends it if it hangs.

| testbench | what it checks |
|---|---|
| `tb_c_element` | C-element rule with masks, against a reference model |
| `tb_rs_latch`, `tb_domino_buffer`, `tb_delay_element` | set/reset/hold; precharge/evaluate/keeper; exact delay, short pulses |
| `tb_dr_lut4` | random tables and masks: spacer until the last input arrives, hold until the last used input leaves |
| `tb_mv_domain_delay` | `T_MV` / `T_MV+DT` latency; no undoing on a supply switch |
| `tb_sa_controller` | VDDL exactly when slack > `DT`, hold after enable, late spacer-phase ack ignored, a new pulse restarts |
| `tb_cfg_sram`, `tb_routing` | read-back; per-step comparison of crossbar, hop delays and request joins against a model |
| `tb_logic_block` | results equal the truth table; latency at both supplies; slack → VDDL with unchanged cycle; no slack → VDDH |
| `tb_sa_fpga` | default-size fabric running an eight-block pipeline with fan-out, reconvergence and a long route; every result word checked; first enable pulse while the pipeline sets its own pace (42 steps per word): one block to VDDL; second pulse while a slow consumer sets the pace (64 steps): six of eight blocks to VDDL; in both cases the cycle time is not longer; back-pressure from a slow sink; mechanism counters |
| `tb_table2` | single-block time per data set at VDDH and VDDL, ratio 4:3 |

Assertions in the RTL run in every simulation with `--assert`: the RS latch never sees set and
reset together, a block's output never shows (1, 1) and never changes from one data word to
another without a spacer in between, and a controller never changes its choice outside an enable
pulse.

To run one with Verilator:

```
verilator --binary --timing --assert --top-module tb_sa_fpga -y rtl -y tb +libext+.sv \
          rtl/sa_pkg.sv tb/tb_sa_fpga.sv -o sim && obj_dir/sim
```

All testbenches pass, and the full-size fabric test finishes in well under a second of
simulation time. Each testbench was also run against a copy of its module with one deliberate
fault, and it reported failures in every case.

## Files

`rtl/sa_pkg.sv` (types, code table, configuration word), `rtl/c_element.sv`, `rtl/rs_latch.sv`,
`rtl/domino_buffer.sv`, `rtl/delay_element.sv`, `rtl/dr_lut4.sv`, `rtl/mv_domain_delay.sv`
(behavioural timing), `rtl/sa_controller.sv`, `rtl/logic_block.sv`, `rtl/route_delay.sv`,
`rtl/routing.sv`, `rtl/cfg_sram.sv`, `rtl/sa_fpga.sv` (top).
