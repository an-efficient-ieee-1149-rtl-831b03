# IEEE 1149.1 boundary scan with at-speed interconnect delay test

A standard IEEE 1149.1 (JTAG) boundary scan can find opens, shorts and
stuck-at faults on the nets between chips. It cannot find a net that is
merely *slow*. With a standard TAP controller, the output cells launch a
test pattern on the falling TCK edge in Update-DR. The input cells capture
the far ends of the nets on the rising TCK edge that leaves Capture-DR.
That is 2.5 TCK periods later, and TCK is usually far slower than the
system clock. Any net that settles within 2.5 slow test clocks passes.

This design fixes that with two small changes. Both are in the TAP, so the
boundary cells stay standard:

1. **Late UpdateDR.** Under EXTEST, the UpdateDR signal that reaches the
   boundary cells is delayed by 1.5 clock periods. The launch then happens
   on the clock edge that enters Capture-DR, and the capture follows one
   clock later. Every other instruction keeps the standard timing.
2. **Clock selection.** Under EXTEST, the TAP and the boundary cells run
   on the system clock instead of TCK in four states: Exit1-DR, Update-DR,
   Select-DR-Scan and Capture-DR. Shifting still runs on TCK, because
   the tester has to supply TDI and read TDO. The launch-to-capture time
   is therefore one system clock period.

The TAP state machine, the instruction set and the boundary cells all stay
standard. The change lives in one block, the modified TAP, plus a clock
multiplexer.

## Launch and capture timing

This is the part worth understanding before you touch the RTL. Take the
state sequence Exit1-DR → Update-DR → Select-DR-Scan → Capture-DR →
Shift-DR. Let the clock edge that enters Update-DR be t0, with one clock
period as the unit:

| event                                      | standard TAP              | this design, EXTEST |
|--------------------------------------------|---------------------------|---------------------|
| enter Update-DR                            | t0                        | t0                  |
| launch, asynchronous cells (UpdateDR pulse) | t0+0.5 (falling edge)     | t0+2 (rising edge)  |
| launch, synchronous cells (UpdateDR level)  | t0+1 (rising edge)        | t0+2 (rising edge)  |
| enter Capture-DR                           | t0+2                      | t0+2                |
| capture (edge leaving Capture-DR)          | t0+3                      | t0+3                |
| launch to capture                          | 2.5 (async) / 2 (sync)    | **1**               |

With the clock selector active, "one period" is a system clock period.
Without it (`at_speed_en` low), it is one TCK period. That is already
enough to catch a gross delay fault with an ordinary tester.

The late level (`late_update_dr`) is the TAP's own UpdateDR level (high
throughout Update-DR) passed through two falling-edge flip-flops. It is
high from t0+1.5 to t0+2.5. A synchronous cell samples it on the rising
edge t0+2. An asynchronous cell gets it ANDed with the clock's high phase,
which gives a pulse that rises at t0+2.

Because the launch happens on the same edge that enters Capture-DR, the
tester must take the path Update-DR → Select-DR-Scan → Capture-DR
(TMS = 1, 1, 0 after Exit1-DR). The path Update-DR → Run-Test/Idle still
launches at t0+2, but nothing captures.

## Clock selection

`clock_select` computes a window signal from three inputs: the TAP state,
the EXTEST decode and ShiftDR. The window is EXTEST and `at_speed_en` and
one of Exit1-DR, Update-DR, Select-DR-Scan or Capture-DR.

The output clock `bs_clk` drives the TAP and every boundary cell. It comes
from a glitch-free multiplexer:

- TCK and `sys_clk` each have an enable flip-flop.
- Each enable changes only on the falling edge of its own clock.
- Each enable waits until the other enable is off.

The sequence runs like this:

1. The TAP enters Exit1-DR on a TCK rising edge.
2. TCK is removed at its next falling edge.
3. `sys_clk` is enabled on a later `sys_clk` falling edge.
4. The next four `bs_clk` edges are system clock edges:
   Exit1→Update, Update→Select, Select→Capture and Capture→Shift.
5. In Shift-DR the window closes and the same handshake hands the clock
   back to TCK.

No high or low phase of `bs_clk` is ever shorter than half a period of
the faster clock. The two enables cross between clock domains without
synchronisers. A silicon implementation should add them.

**Tester requirement.** Inside the window the TAP consumes one TMS value
per system clock. The tester must therefore present TMS = 1, 1, 0, 0 on
successive system clock edges. The testbenches do this by driving TMS
after every falling edge of `bs_clk` (an output of the top).

## Boundary cells and their wiring

`bsc` is a type-1 cell with two stages:

- The capture/shift flip-flop loads `data_in` or `si` when `capture_en`
  is high.
- The update flip-flop copies the capture stage when `update_en` is high.
- `data_out = mode ? update : data_in`.

`bs_chain` strings the cells in this order: TDI → input cells (pin order)
→ output cells → SO.

The top parameter `ASYNC_CELLS` chooses how the update stage is driven:

- `0` (default), synchronous: the update stage is clocked by `bs_clk` and
  enabled by the selected UpdateDR *level*.
- `1`, asynchronous: `update_en` is tied high and the update stage is
  clocked by the selected UpdateDR *pulse*.

In both cases the capture stage runs on `bs_clk` with `sync_capture_en`.

## Instructions and registers

- The instruction register is 2 bits wide and captures the `sentinel`
  input in Capture-IR. It is updated on the falling edge in Update-IR, and
  reset to BYPASS by TRST or Test-Logic-Reset. There is no IDCODE register
  and no user data register.
- `00` EXTEST: selects the boundary register; the late UpdateDR and the
  clock window are active. Both mode outputs are set, so the output pins
  come from the update stages and the core inputs are isolated.
- `01` SAMPLE/PRELOAD: selects the boundary register with standard timing.
  The cells are transparent.
- `11` BYPASS, and the unused `10`: select the 1-bit bypass register.
- The input `bypass_sel` forces the bypass register under any instruction
  and freezes the boundary register.
- TDO and TDO enable change on falling edges, as the standard requires.

## Top level, `bscan_delay_top`

| port | dir | meaning |
|------|-----|---------|
| `tck`, `tms`, `tdi`, `trst_n`, `tdo`, `tdo_en` | | test access port (TRST active low, asynchronous) |
| `sys_clk` | in | system clock used in the at-speed window |
| `at_speed_en` | in | allow the switch to `sys_clk` (low: whole EXTEST on TCK) |
| `bypass_sel` | in | force the bypass register |
| `sentinel[1:0]` | in | value captured into the instruction register |
| `pin_in[N_IN]`, `pin_out[N_OUT]` | in/out | chip pins through the boundary cells |
| `core_in[N_IN]`, `core_out[N_OUT]` | out/in | connection to the core logic, which is not part of this design |
| `extest`, `samp_load`, `tap_state[15:0]` | out | decoded instruction and one-hot TAP state (bit *i* = state *i* of `bscan_pkg::tap_state_e`, Test-Logic-Reset = bit 0) |
| `bs_clk`, `sys_selected`, `clock_dr`, `update_dr` | out | selected clock and its source, standard ClockDR, UpdateDR as the cells see it |

The parameters are `N_IN = 2` and `N_OUT = 1` (a two-input, one-output
sample core) and `ASYNC_CELLS = 0`.

## Testing a board: the 2⌈log₂(n+2)⌉ pattern set

Give each of *n* nets the code *j*+1, *K* = ⌈log₂(*n*+2)⌉ bits wide. No
net then carries all zeros or all ones. Apply each code bit as a pattern
and follow it with its complement. That gives 2*K* patterns (the classic
2 log *n* set, widened by two codes). Every net makes at least *K*
transitions, and each transition is launched and captured one clock
apart. A net whose captured value differs from its driven value is
faulty:

- A static fault fails at any speed.
- A slow net fails only at speed.
- A short between two nets (AND or OR behaviour) fails at any speed too,
  because no two nets share a code.

`tb/bscan_interconnect_tb.sv` does exactly this with 116 + 116 cells
(232 cells in all). Its board has one stuck-at-0 net, two nets shorted
with AND behaviour, and one slow net (15 ns against a 10 ns system
clock). It checks two results:

- At TCK rate, exactly the stuck and shorted nets fail.
- At system speed, the slow net fails as well.

## Hardware cost

After coarse synthesis (word-level cells):

- Late UpdateDR block: 2 flip-flops and 3 cells.
- Clock selector: 2 flip-flops and 17 cells.
- Complete modified TAP (state machine, IR, bypass, late UpdateDR, TDO):
  13 flip-flops.

None of the added logic grows with the number of boundary cells. That is
the point of the design: the alternative approach adds a latch or
multiplexer to every cell.

## Where this RTL departs from the original design, or fills gaps

- **Late UpdateDR uses 2 flip-flops, not 3.** The published area figures
  count three flip-flops for the late UpdateDR block. Two falling-edge
  stages already give exactly 1.5 periods, and a third stage would not
  change the output.
- **The clock selector uses 2 enable flip-flops, not 1.** The published
  figures count one flip-flop for the clock selector. Two are needed for
  glitch-free switching in both directions.
- **`at_speed_en` is an addition.** It allows an EXTEST run entirely on
  TCK.
- **The instruction set is a choice.** The SAMPLE/PRELOAD opcode, the
  handling of the unused opcode, the input-cell mode under EXTEST and the
  exact role of `bypass_sel` are this design's choices. EXTEST = 00 and
  BYPASS = 11 follow IEEE 1149.1.
- **The capture stage always uses an enable.** It runs on `bs_clk` with
  an enable even with asynchronous cells (no gated ClockDR into the cells).
  `clock_dr` is still provided as an output.
- **Cell details are assumptions.** The enable polarities (active high),
  the chain order (inputs first) and the `tap_state` bit order are
  assumptions. The bit order matches the Shift-DR and Update-DR values of
  the original simulation trace.
- **Not built:** the core logic, pads, bidirectional or tristate pins,
  and the optional instructions (CLAMP, HIGHZ, RUNBIST, IDCODE).

## Files and simulation

`rtl/`:

- `bscan_pkg.sv`: state and instruction enums, next-state function.
- `tap_fsm.sv`: the state machine.
- `tap_ir.sv`: the instruction register, decode and mode generation.
- `late_update_gen.sv`: the late UpdateDR block.
- `modified_tap.sv`: the TAP with the late UpdateDR block built in.
- `clock_select.sv`: the glitch-free clock multiplexer.
- `bsc.sv`: one boundary cell.
- `bs_chain.sv`: the boundary register.
- `bscan_delay_top.sv`: the top level.

`tb/` holds one self-checking testbench per module, `<module>_tb.sv`,
and two more:

- `bscan_delay_top_async_tb.sv`: the end-to-end test with asynchronous
  cells.
- `bscan_interconnect_tb.sv`: the 232-cell board test.

Every testbench prints `TB_RESULT checks=N failures=M` and finishes. Run
one with:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
  rtl/bscan_pkg.sv tb/bscan_delay_top_tb.sv --top-module bscan_delay_top_tb
./obj_dir/Vbscan_delay_top_tb
```

`bscan_delay_top_tb` runs the default-size design through every
mechanism: reset, BYPASS, IR capture, SAMPLE/PRELOAD with the 2-clock
standard timing, and EXTEST on TCK with the 1-TCK late update. It then
runs at-speed EXTEST twice, once with a fast net that passes and once with
a 15 ns net that fails against a 10 ns system clock. It finishes with
`bypass_sel` and the TMS reset. It checks the launch-to-capture times to
the picosecond, and it counts each mechanism; one that never occurred is
a failure.
