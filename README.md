# Delay-fault testing of an embedded core through its P1500 wrapper

An embedded core (IP block) on a system chip is normally tested through an
IEEE P1500 wrapper: a ring of boundary cells around the core, a serial
test port (WSI/WSO), an instruction register (WIR) and a one-bit bypass
register (WBY). That wrapper can apply and observe static patterns, but it
cannot tell whether a path through the core is *slow*.

This design extends the wrapper so that it can measure path delays with the
**oscillation test method**. A path through the core is sensitised (every
side input held at its non-controlling value). The wrapper then closes a
loop from the core output at the end of the path back to the core input at
its start. If the loop inverts an odd number of times it becomes a ring
oscillator, and its period is about twice the path delay. The bypass
register turns into a counter that counts oscillation periods in a fixed
window. A delay fault on the path lengthens the period and lowers the
count. The count is shifted out serially, so a slow tester is enough.

The wrapper keeps P1500 behaviour: functional mode, inward-facing test
(INTEST) and outward-facing test (EXTEST) through the same serial port,
controlled by the six WIP signals.

## What is added to a plain P1500 wrapper

| Element | Where | Purpose |
|---|---|---|
| Address registers in every boundary cell | `cell_addr_reg` | pick one input cell and one output cell by address |
| Loop multiplexer in each input cell | `enh_input_cell` | feed the loop into the core input of the selected cell |
| Loop driver in each output cell | `enh_output_cell` | put the core output of the selected cell onto the loop net |
| Demultiplexer 1 and multiplexer 2 (`dc1`) | `enhanced_wrapper` | a short serial path that goes straight to the output cells |
| XOR 4 (`dc2`) | `enhanced_wrapper` | sets whether the loop inverts |
| Multiplexer 3 (`dc0`) | `wby_counter` | switches the bypass register from serial data to counting the loop |

Four extra control signals drive these elements. They come from the pins or
from an on-chip test controller:

* `dc`: the serial path runs through the cells' address registers instead of their data stages.
* `dc0`: the bypass register is clocked by the loop (multiplexer 3), and the counting window opens.
* `dc1`: WSI feeds the output cells directly, and the input cells hold.
* `dc2`: the loop inverts (XOR 4), and counting is enabled.

## Cell addressing: the part that takes getting used to

Every boundary cell holds two address registers of `AW` bits:

* **AD** is a shift register on the serial path. All ADs of one chain form a
  single long shift register while `dc` is high.
* **CAR** holds the cell's *unique* address. CAR is loaded from AD on
  UpdateWR, but only under the `LOADIN_UNIQ` instruction (input cells) or
  the `LOADOUT_UNIQ` instruction (output cells).

The cell is *selected* when its AD equals its CAR and the `DELAY_TEST`
instruction is active. So addressing takes two phases:

1. **Give every cell its unique address (once).** Load `LOADIN_UNIQ` into the WIR.
   With `dc=1`, shift in one address per cell, then pulse UpdateWR. Do the same
   with `LOADOUT_UNIQ` for the output cells. Set `dc1=1` so that only the
   `N_OUT*AW` output-cell bits need to be shifted. The core stays in
   functional mode throughout.
2. **Select a path (per test).** Under `DELAY_TEST`, shift the *same* select
   address into every AD. Exactly one cell per chain then finds AD = CAR.
   Shift the input chain's address first, through the whole chain with
   `dc1=0`. Then shift the output chain's address over the `dc1=1` short
   path. The input cells hold during the second shift, so input and output
   cells can have different select addresses.

Bit order: each AD shifts towards its LSB, which appears first on the serial
output. New bits enter at the MSB. The serial chain is WSI, input cells
`0 .. N_IN-1`, output cells `0 .. N_OUT-1`, WSO. Shifting the AD chain
therefore places the last bits shifted in into input cell 0.
`tb/tb_enhanced_wrapper.sv` (`addr_content`, `stream_for`) shows how a
stream is built.

After reset every AD is 0 and every CAR is all ones, so no cell matches.
Right after phase 1, each AD still equals its own CAR, so every cell
matches. Always do phase 2 before raising `dc2`. An assertion in the
wrapper checks that at most one output cell drives the loop, and at most
one input cell takes it, while `dc2` is high under `DELAY_TEST`.

## The oscillation measurement

```
  selected input cell --> core path --> selected output cell --> loop net
          ^                                                          |
          |                                                         XOR 4 (dc2)
          +----------------------------------------------------------+
                                                                      \--> WBY clock (dc0)
```

Procedure (all control changes while WRCK is low):

1. `DELAY_TEST` into the WIR.
2. Shift the sensitising vector through the boundary register with
   CaptureWR, ShiftWR and UpdateWR. Under `DELAY_TEST`, CaptureWR also
   clears the bypass register. The unselected input cells drive the core
   from their update stages.
3. Select the cells (phase 2 above).
4. `dc0=1`: the bypass register is now clocked by the loop signal. Nothing
   counts yet.
5. `dc2=1`: a non-inverting path becomes an inverting loop and oscillates,
   and the counter increments on every rising edge of the loop.
6. After the window, `dc0=0` first: the clock returns to WRCK. Then `dc2=0`.
7. Load `COUNT_READ` and shift `CW` bits out of WSO, LSB first.

The expected count is about `window / (2 * (t_path + t_loop))`, where
`t_loop` is the delay of the loop's own wiring through the wrapper (zero in
the simulation model). With the default test (7.17 ns path,
1 µs window) the count is 70, and 67 with an extra 0.4 ns on the path.

Limits of the method as built:

* `dc2` both makes the loop invert and opens the counter. A path that
  already inverts oscillates with `dc2=0`, where counting is shut. As built,
  only non-inverting paths can be measured.
* The clock switch in front of the counter is a plain multiplexer. Keep to
  the order above, so that the switch adds no edge that changes the
  register.
* The counter wraps at `2**CW`. Choose the window so the count stays below
  that.
* The count is taken asynchronously to WRCK. Read it only after the window
  has closed.

## Instructions

| Opcode | Name | WSI to WSO | Cells |
|---|---|---|---|
| 0 | `WS_BYPASS` (also any unused code) | 1 bit of WBY | functional |
| 1 | `WS_EXTEST` | boundary register | output cells drive the chip; capture chip inputs and core outputs |
| 2 | `WS_INTEST` | boundary register | input cells drive the core; capture chip inputs and core outputs |
| 3 | `LOADIN_UNIQ` | boundary register (ADs when `dc=1`) | functional; UpdateWR loads input-cell CARs |
| 4 | `LOADOUT_UNIQ` | boundary register (ADs when `dc=1`) | functional; UpdateWR loads output-cell CARs |
| 5 | `DELAY_TEST` | boundary register (ADs when `dc=1`) | input cells drive the core, selected pair closes the loop; CaptureWR clears WBY |
| 6 | `COUNT_READ` | all `CW` bits of WBY | functional |

The WIR is 3 bits. It captures `001` and resets to `WS_BYPASS` on WRSTN.
All registers change on the rising edge of WRCK; the counter is the
exception while it counts.

## Files

| File | Contents |
|---|---|
| `rtl/p1500_pkg.sv` | instruction enum, per-cell control struct `wbr_ctrl_t` |
| `rtl/cell_addr_reg.sv` | AD, CAR and comparator |
| `rtl/enh_input_cell.sv`, `rtl/enh_output_cell.sv` | boundary cells |
| `rtl/wir.sv` | instruction register |
| `rtl/wby_counter.sv` | bypass register and oscillation counter |
| `rtl/enhanced_wrapper.sv` | top: decode, chains, loop net, XOR, WSO multiplexers |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/mcu_path_model.sv` | delay-annotated stand-in for the wrapped core (testbench only) |

Top parameters: `N_IN=8` and `N_OUT=8` (an 8-bit microcontroller core with
eight cells on each side), `AW=4`, `CW=8`. The core is not part of the RTL.
It connects to `cfi_core` and `cfo_core`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. The top-level test runs at the default parameters:

```
verilator --binary --timing --assert rtl/p1500_pkg.sv rtl/cell_addr_reg.sv \
  rtl/enh_input_cell.sv rtl/enh_output_cell.sv rtl/wir.sv rtl/wby_counter.sv \
  rtl/enhanced_wrapper.sv tb/mcu_path_model.sv tb/tb_enhanced_wrapper.sv \
  --top-module tb_enhanced_wrapper -Wno-fatal
./obj_dir/Vtb_enhanced_wrapper
```

This test goes through functional mode, bypass, EXTEST, INTEST, both
unique-address loads (with the `dc1` short path), and four delay
measurements:

* the 7.17 ns critical path;
* the same path with an injected 0.4 ns fault;
* a 2 ns path;
* the pair input cell 2 and output cell 1.

It counts each mechanism and fails if any of them never occurred. The
core model makes output `j` the AND of inputs `j` and `j+1`. Holding input
`j` at 1 therefore sensitises the path from input `j+1` to output `j`.
Verilator reports the ring through this model as circular logic
(UNOPTFLAT). That is expected: the loop is the thing under test.

The other testbenches need only the files their module uses. For example:

```
verilator --binary --timing --assert -Wno-fatal rtl/p1500_pkg.sv rtl/wir.sv tb/tb_wir.sv --top-module tb_wir
```

`-Wno-fatal` keeps warnings about the testbenches' delays (for example the
variable oscillator period in `tb_wby_counter`) from stopping the build.

## How far it follows the published scheme, and where it departs

Taken from the scheme:

* the cell address registers (AD/CAR) and the comparison;
* the use of UpdateWR under `LOADIN_UNIQ` and `LOADOUT_UNIQ`;
* the loop multiplexer in the input cells and the loop driver in the output cells;
* demultiplexer 1 and multiplexer 2 on `dc1`, and XOR 4 on `dc2`;
* multiplexer 3 on `dc0`;
* reuse of the bypass register as a pulse counter that is cleared before
  the test and shifted out afterwards;
* eight cells per side around an 8-bit microcontroller.

Choices of this design, where the scheme is silent:

* the cell structure (capture/shift stage plus update stage);
* all widths and opcodes, bit order and reset values;
* the `DELAY_TEST` and `COUNT_READ` instructions, which the scheme only
  implies ("depending on the instruction");
* clearing the counter with CaptureWR;
* the chain order.

Departures:

* **Loop net.** The scheme uses tristate buffers in the output cells. Here
  each cell drives an enable and an AND term, and the wrapper ORs them. The
  result is the same for one selected cell, and there are no tristate nets.
* **Direction of the count.** In the reported results, a 400 ps fault
  raised the count from 31 to 35. This contradicts the stated mechanism,
  which counts oscillation pulses in a fixed window: that count must fall
  when the path slows down. This design follows the stated mechanism, so a
  fault lowers the count. The absolute counts depend on the window, which
  is not given.
* **Not built.** The parallel ports WPI/WPO and the multiplexers in front
  of the core's internal scan chains. The scan chains belong to the core,
  and the multiplexer controls are not described.
* **Not built.** The core-side routine that keeps a clocked
  microcontroller's outputs updating during the test. It is core logic.
* **Not built.** The on-chip controller that would sequence `dc..dc2`.
  The testbench plays that role.
* **Not built.** The small sequential circuit with feedback used to show
  that the method applies to sequential logic. Its gate-level function is
  not given.
