# Star test topology for board test

Conventional boundary scan chains every device on a board into one daisy
chain: each device needs TDI, TDO, TCK and TMS, and each carries an
instruction register, an ID register and a bypass register so that its
neighbours' data can pass through it. A break anywhere in the chain hides
every device behind it.

The star test topology (STT) replaces the chain with a star. One test access
port (TAP) on the board is the hub. Every device under test (DUT) is a leaf
reached over **one bidirectional wire**, its TD I/O line, and talks only
to the TAP. A device needs one test pin and a small test hub (TH) behind
it; it needs no instruction, ID or bypass logic. The computer picks one DUT
per test by address. A dead DUT affects only its own line.

This repository holds synthesizable SystemVerilog for the whole board-side
test logic: the TAP, the per-line resolution, and the test hub with its
receiver and its response transmitter. The transmitter follows a concrete
discrete-logic circuit (a 74HC74 flip-flop, a 74HC165 shift register, a
flip-flop counter and a 74HC126 tri-state buffer). The logic of the devices
themselves, and the computer, are outside the design.

```
             tdi  ─►┌─────────┐  TD I/O 0  ┌────┐
  computer   tdo  ◄─│   TAP   │◄──────────►│ TH │ DUT 0 ─ dut_in[0] / ic_out[0]
             trst ─►│ tap_hub │  TD I/O 1  ┌────┐
             tck  ─►│         │◄──────────►│ TH │ DUT 1
                    │ header  │     ...
                    │ demux / │  TD I/O 4  ┌────┐
                    │ mux     │◄──────────►│ TH │ DUT 4
                    └─────────┘            └────┘
```

## One test, end to end

A test is a single transaction. It starts with a `trst` pulse and ends
when the response has been read. Everything runs on one clock, `tck`.
The computer shifts this packet into `tdi`, one bit per clock, first bit
first:

| field        | bits     | meaning                                         |
|--------------|----------|-------------------------------------------------|
| start        | 1        | always 1; the TAP idles until it sees it        |
| address      | `ADDR_W` | DUT number, MSB first                           |
| hub start    | 1        | always 1; forwarded, starts the test hub        |
| pattern      | `N_IN`   | stimulus for the DUT inputs, MSB first          |

The TAP forwards the last `N_IN+1` bits to the addressed line only. The
hub applies the pattern to the DUT inputs and captures the DUT outputs.
It then sends them back over the same wire, and the TAP passes them to
`tdo`. At the default sizes (`ADDR_W`=3, `N_IN`=4, `N_OUT`=4), counting the
clock edge that samples the first start bit as edge 0:

| edge  | TAP                                  | line            | test hub                              |
|-------|--------------------------------------|-----------------|---------------------------------------|
| 0     | start bit seen                       | idle (0)        | idle                                  |
| 1–3   | address shifted in                   | idle            | idle                                  |
| 4–8   | hub start + pattern sampled, re-sent | TAP drives      | start at 5, pattern bits at 6–9       |
| 9     | releases the line                    | floating → 0    | `dut_in` updated, `startup` rises     |
| 10    | receiving: `tdo` = line              | hub drives      | DUT outputs captured, `load` rises    |
| 11–14 | response bits sampled on `tdo`       | hub drives      | one response bit shifted per clock    |
| 14    | —                                    | released        | counter ends the capture              |

In general the response bit `ic_out[N_OUT-1-k]` is on `tdo` at edge
`ADDR_W + N_IN + 4 + k`. The TAP keeps the line connected to `tdo` until the
next `trst`. To test another DUT, or the same one again, pulse `trst` and
send a new packet. From the first start bit to the last response bit, a test
takes `ADDR_W` + `N_IN` + `N_OUT` + 4 clocks: 15 at the defaults, plus the
`trst` pulse.

The computer finds a failed DUT by comparing each response with the
expected one. The address alone says which device failed, because each
device is tested in isolation.

## The shared wire and its turnaround

Each TD I/O line has two tri-state drivers, one at the TAP and one at the
hub. `td_io_line` resolves them. In RTL a driver is a `td_drv_t` bundle,
`{o, oe}` (value and enable), defined in `stt_pkg`. The line reads the
enabled driver's value, or 0 (pull-down) when neither drives. `conflict`
flags both driving at once, and a concurrent assertion reports it in
simulation.

The protocol keeps the two ends apart by timing alone, with no extra wire:

* The TAP drives a line only in the `N_IN+1` clocks after the address, and
  only the addressed line. This is the direct addressing that stops DUTs
  from fighting over a wire.
* The hub drives only while its transmitter's `load` flip-flop is set.
  This starts one clock after the TAP has let go and lasts exactly `N_OUT`
  clocks.
* While the hub sends, its receiver ignores the line. A response bit of 1
  therefore cannot be taken for a new start bit.

## Inside the test hub

`test_hub` has a receiving half and a sending half.

**`tdi_driver`** (receiver). It waits for a 1 on the idle-low line, then
shifts in `N_IN` bits. When the last bit arrives it copies all of them to
`dut_in` in one step, so the DUT never sees a half-shifted pattern. `dut_in`
then holds the pattern until the next frame completes. The driver raises
`startup` and holds it until the transmitter reports the end of the
capture (`cnt_rst`).

**`tdo_transmitter`** (sender). It has three units, after the discrete
circuit:

* `load_ctrl`: one D flip-flop with `startup` on D. Its output `load` is
  wired to the shift register's active-low parallel-load input. While `load`
  is 0, the register keeps taking the DUT outputs. The clock edge that sees
  `startup` high sets `load`. This freezes the captured response and starts
  serial shifting.
* `piso_shift_reg`: the 8-bit register. It has parallel load (`pl_n`),
  clock enable (`ce_n`), serial input (`ds`) and complementary serial outputs
  (`q7`, `q7_n`). The `N_OUT` DUT outputs occupy the top `N_OUT` inputs, as
  the four-output circuit wires them to inputs E–H. So the first bit out is
  the highest DUT output, already on `q7` during the load phase. Each later
  clock shifts the next one out. A device with more outputs than one
  register holds gets `ceil(N_OUT/SR_WIDTH)` registers. They are cascaded
  the way the part is meant to be expanded: each register's `ds` takes the
  previous register's `q7`.
* `capture_counter`: counts while `load` is high. In the `N_OUT`-th clock it
  raises `cnt_rst`, which clears `load` on that edge. The register then
  returns to parallel load, and the hub's output buffer is disabled. `retest`
  is the inverted counter reset, as the circuit brings it out through an
  inverter.

`tdo_oe = load` is the enable of the output buffer.

## Inside the TAP

`tap_hub` is a four-state machine:

| state | does |
|-------|------|
| idle  | wait for a start bit on `tdi` |
| hdr   | shift `ADDR_W` bits into the header register |
| fwd   | register each `tdi` bit and drive it onto the addressed line, for `FWD_BITS` = `N_IN`+1 clocks |
| recv  | `tdo` = addressed line, until `trst` |

`trst` is an asynchronous, active-high reset of the TAP alone. The hubs
have no `trst`: they see only their line, and finish any transfer on their
own. An address of `NUM_DUTS` or more (5–7 at the defaults) selects no
line. In that case nothing is driven, `tdo` stays 0 and `addr_err` is set.

## Parameters

| parameter  | default | where it lives | origin |
|------------|---------|----------------|--------|
| `NUM_DUTS` | 5 | `stt_top`, `tap_hub` | five DUTs on the original board diagram |
| `N_OUT`    | 4 | `stt_top`, `test_hub`, `tdo_transmitter` | the original transmitter is for a four-output IC |
| `SR_WIDTH` | 8 | same | 8-bit 74HC165 register |
| `N_IN`     | 4 | `stt_top`, `test_hub`, `tdi_driver` | this design's choice |
| `ADDR_W`   | 3 | `stt_top`, `tap_hub` | ⌈log2 `NUM_DUTS`⌉, at least 2 |

`N_OUT` may be any value of 1 or more. An eight-output IC fills one
register, and wider ICs use cascaded registers. The defaults live in `stt_pkg`.

## What follows the original circuit and what does not

Taken from the original description:

* the star of point-to-point lines with one TAP
* the single bidirectional pin per device
* address in the packet header, and forwarding through a serial-to-parallel
  register and a demultiplexer
* TRST followed by a new packet to select another device
* a test hub per device with a receiver that raises `startup`
* the transmitter's three units and the way they interact
* the register's function table and shift order
* the four-output wiring to the top register inputs
* the capture period of N clocks for N outputs
* the inverted `ReTest` output

This design's own choices, because the description does not give them:

* the packet layout and both start bits
* the number of DUT inputs
* the one-clock turnaround and the pull-down idle level
* `trst` polarity, and a shared test clock
* the handling of invalid addresses
* the power-on reset `rst_n` of the hubs
* the receiver's holding register

Departures from the discrete parts:

* The 74HC165 loads asynchronously. Here the load is synchronous, with `q7`
  made transparent to the last parallel input during load.
* Clocking the register through a rising `CE` edge is not modelled. `ce_n` is
  a plain clock enable.
* The capture counter is drawn as a chain of four flip-flops that resets the
  loading flip-flop through its preset/clear pins. Here it is a binary counter
  with a synchronous clear on the same edge. The period is the same.
* Tri-state buffers and the wired line are modelled as enables and a
  multiplexer (`td_io_line`). This suits synthesis and two-state simulation.
  A real board would use pad tri-states and an external pull-down.

Not included:

* A broadcast address. The method speaks of the computer sending stimulus
  to several DUTs through the TAP, but with direct addressing and one
  shared response path, this design tests one DUT per packet.
* The devices' own logic. `dut_in` and `ic_out` are ports of the top.
* The computer, or microcontroller, that sends packets and judges the
  responses.

## Files

| file | content |
|------|---------|
| `rtl/stt_pkg.sv` | default sizes, `td_drv_t` line-driver bundle |
| `rtl/stt_top.sv` | the board: TAP, lines, one test hub per DUT |
| `rtl/tap_hub.sv` | shared TAP |
| `rtl/td_io_line.sv` | resolution of one bidirectional line |
| `rtl/test_hub.sv` | per-DUT test hub |
| `rtl/tdi_driver.sv` | hub receiver |
| `rtl/tdo_transmitter.sv` | hub transmitter |
| `rtl/load_ctrl.sv`, `rtl/capture_counter.sv`, `rtl/piso_shift_reg.sv` | transmitter units |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_stt_four_ic` |
| `tb/ic_core_model.sv` | stand-in DUT logic for the testbenches |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
watchdog that counts a failure if the simulation hangs. For example, the
end-to-end test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/stt_pkg.sv tb/tb_stt_top.sv --top-module tb_stt_top
./obj_dir/Vtb_stt_top
```

Swap in another `tb_<module>` to test one block. The package must come
first on the command line. The testbenches use `$urandom` but no constrained
randomisation.

`tb_stt_top` runs the top at its default sizes. It tests:

* every DUT with every pattern
* all three invalid addresses
* two DUTs with an injected stuck-at-0 output, which must be found by
  comparing responses, while the other DUTs still pass
* 100 random tests

It checks each response against the IC model's formula, with the latency
given above. It also checks that no other DUT's inputs move and that no line
is ever driven from both ends. It counts each mechanism: TRST reselection,
line turnaround, the `retest` pulse, invalid addresses and defects found.
A mechanism that never happens counts as a failure.

`tb_stt_four_ic` runs a four-DUT board whose ICs have eight inputs and eight
outputs each. That is the size of the IC in the transmitter's block
diagram. It uses the same method over a strided sweep of patterns.

The block testbenches cover the following:

* the register: the load/inhibit/shift sequence of its data sheet, plus
  random checks against its function table
* the transmitter: four-, eight- and twelve-output builds (the last with
  two cascaded registers), with an assertion that each response drives the
  line for exactly `N_OUT` clocks
* the TAP: every address, with check of forwarding, line isolation and
  `tdo` routing

## Trust and limits

* All modules pass Verilator's `-Wall` lint and elaborate with slang. The
  only remarks are package constants that a given module does not use.
* Every testbench passes, and each fails on a deliberately broken copy of
  its module.
* The protocol-level choices listed above are one consistent reading, not
  the only possible one. Whatever drives `tdi` must follow the packet layout
  and the response latency given here.
* Timing closure and pad-level electrical behaviour are not addressed. The
  original circuit was chosen partly for the register's input clamping
  current rating of ±20 mA, which a real board would still need.
