# A programmable IEEE 1149.1 (JTAG) controller

Normally each chip gets its own hand-written boundary-scan logic. This RTL
replaces that with one JTAG controller. You size it for the circuit it wraps by
setting its parameters: the number of input and output pins sets the length of
the boundary-scan register. The number and width of the PRIVATE-x data
registers set how much of the core's internal state a tester can read and
write. The rest is fixed: the 16-state TAP controller, the instruction register,
the decoder, the bypass register and the ID registers. That fixed part follows
IEEE 1149.1.

A tester reaches everything through four pins:

- TCK, the test clock
- TMS, the mode select that steps the state machine
- TDI and TDO, the serial data in and out
- TRST_N, an optional asynchronous reset

The default configuration fits the smallest ISCAS'89 benchmark circuit, s27. As
counted with pads, that is 11 inputs and 2 outputs, with one 8-bit private
register. `tb/tb_iscas89_sizes.sv` builds the controller for all 27 ISCAS'89
circuits at once.

## Block structure

```
            +--------------------- jtag_controller ---------------------+
 TMS ------>| tap_controller --ctrl (tap_ctrl_t)--> every register       |
 TCK ------>|                                                           |
 TRST_N --->|                                                           |
            |        +-> instruction_register --instr--> instruction_decoder
 TDI ------>|--------+-> bypass_register            (dec: which DR,     |
            |        +-> id_register  (IDCODE)       cell modes, pad OE)|
            |        +-> id_register  (USERCODE)                        |
            |        +-> boundary_scan_register (N_IN + N_OUT cells)    |
            |        +-> private_register x NUM_PRIVATE                 |
            |                  all serial outputs --> tdo_mux --------->|--> TDO, TDO_EN
            +-----------------------------------------------------------+
 pin_in --> [input cells] --> core_in      core_out --> [output cells] --> pin_out, pin_oe
 priv_in (core register) --> private_register --> priv_out, priv_load
```

| File | Role |
|---|---|
| `rtl/jtag_pkg.sv` | TAP state enum, `tap_ctrl_t` control bundle, opcodes, `decode_t` |
| `rtl/tap_controller.sv` | 16-state Moore FSM driven by TMS |
| `rtl/instruction_register.sv` | 4-bit IR: a shift stage plus a holding stage |
| `rtl/instruction_decoder.sv` | Turns the instruction into a data-register select, cell modes and the pad enable |
| `rtl/bypass_register.sv` | 1-bit bypass register |
| `rtl/id_register.sv` | 32-bit constant register, used for both IDCODE and USERCODE |
| `rtl/boundary_scan_cell.sv` | Two-stage cell with a mode multiplexer |
| `rtl/boundary_scan_register.sv` | Chain of `N_IN` input cells and `N_OUT` output cells |
| `rtl/private_register.sv` | PRIVATE-x register: reads and writes a core register |
| `rtl/tdo_mux.sv` | Selects the serial source and retimes it on falling TCK |
| `rtl/jtag_controller.sv` | Top level |

## The TAP state machine

`tap_controller` has the sixteen standard states. Test-Logic-Reset and
Run-Test/Idle are joined by a DR column and an IR column of seven states each:

- Select
- Capture
- Shift
- Exit1
- Pause
- Exit2
- Update

TMS is sampled on every rising edge of TCK. Its transitions are the standard
ones:

- Holding TMS at 1 always reaches Test-Logic-Reset within five edges, from any
  state. An assertion in the module checks this.
- TMS 1-1-0-0 from Run-Test/Idle enters Shift-IR.
- TMS 1-0-0 from Run-Test/Idle enters Shift-DR.
- A 1 leaves Shift for Exit1. A further 1 goes to Update, and a 0 goes to Pause.

The machine is Moore. Every control in the `tap_ctrl_t` bundle is decoded from
the present state alone:

- `reset`
- `enable`, the TDO enable
- `select_ir`
- `clock_dr` and `clock_ir`
- `capture_*`, `shift_*` and `update_*`

TRST_N forces Test-Logic-Reset asynchronously.

## Scan timing

All test logic runs on TCK. There are no gated clocks. The clock-DR and
clock-IR outputs are enables.

| Edge | What happens |
|---|---|
| rising TCK in Capture-xR | The selected shift stage loads its parallel input (IR: `0001`) |
| rising TCK in Shift-xR | The selected shift stage shifts one place toward bit 0; TDI enters at the top |
| falling TCK in Update-xR | The shift stage is copied to its update or holding stage; a new instruction takes effect here |
| falling TCK | TDO takes bit 0 of the selected register; TDO_EN is high only in Shift-DR/IR |

The tester drives TMS and TDI after a falling edge and samples TDO before the
next rising edge. Every register leaves TDO LSB first. A DR scan of *n* bits
from Run-Test/Idle back to Run-Test/Idle takes *n* + 5 TCK cycles:

- 3 cycles to reach Shift-DR
- *n* shift cycles, the last one passing to Exit1
- 2 cycles for Update-DR and the return to Run-Test/Idle

An IR scan takes one cycle more. TDO is 0 while TDO_EN is low. A pad would be
tri-stated there.

## Instructions

The IR is 4 bits wide. When the IR is captured, the shift stage loads `0001`:
the two low bits are `01`, as the standard requires. Test-Logic-Reset loads
IDCODE.

| Opcode | Instruction | Register between TDI and TDO | Input cells drive core | Output cells drive pads | Pads enabled |
|---|---|---|---|---|---|
| 0000 | EXTEST | boundary | no | yes | yes |
| 0001 | SAMPLE/PRELOAD | boundary | no | no | yes |
| 0010 | IDCODE | 32-bit ID | no | no | yes |
| 0011 | USERCODE | 32-bit user code | no | no | yes |
| 0100 | INTEST | boundary | yes | yes | yes |
| 0101 | CLAMP | bypass | no | yes | yes |
| 0110 | HIGHZ | bypass | no | no | **no** |
| 1000+x | PRIVATE-x (x < `NUM_PRIVATE`) | private register x | no | no | yes |
| 1111, others | BYPASS | bypass | no | no | yes |

- **EXTEST** tests board wiring. The output pads carry whatever was preloaded
  with SAMPLE/PRELOAD or shifted in by the last EXTEST scan. The input cells
  capture the pads.
- **INTEST** tests the core alone. The core inputs come from the input cells'
  update stages. The core outputs are captured by the output cells.
- RUNBIST is not implemented, because no self-test is defined for the core. Its
  code would be just another unused opcode, and so it selects BYPASS.

## Boundary-scan register and the core

Let `N = N_IN + N_OUT`. The chain holds N cells:

- Cell *k* for *k* < `N_IN` sits between `pin_in[k]` and `core_in[k]`.
- Cell `N_IN`+*j* sits between `core_out[j]` and `pin_out[j]`.
- TDI enters cell N-1, and cell 0 drives TDO.

So a vector shifted in LSB first ends up with bit *k* in cell *k*. A capture
reads out as `{core_out, pin_in}`, LSB first.

Each cell has a capture/shift flip-flop and an update flip-flop. It also has a
multiplexer that passes either the functional value or the update stage. In
normal operation (any instruction but EXTEST, INTEST and CLAMP), the core and
the pads are connected straight through, combinationally. `pin_oe` is the pad
enable, and only HIGHZ clears it.

## PRIVATE-x registers

Each PRIVATE-x instruction reaches one `private_register`, which gives the
tester access to a register inside the core:

- Capture-DR loads `priv_in[x]`, for example the core's state flip-flops.
- Update-DR writes the shifted-in value to `priv_out[x]`.
- `priv_load[x]` is high for the whole Update-DR state. The core can use it to
  take `priv_out[x]` in its own clock domain.

The opcodes `1000`–`1110` allow up to seven such registers.

## Parameters of `jtag_controller`

| Parameter | Default | Meaning |
|---|---|---|
| `N_IN` | 11 | input boundary cells (circuit's primary inputs) |
| `N_OUT` | 2 | output boundary cells (circuit's primary outputs) |
| `NUM_PRIVATE` | 1 | number of PRIVATE-x registers, 1..7 |
| `PRIV_WIDTH` | 8 | width of each private register |
| `IDCODE_VALUE` | `32'h1000_0001` | IDCODE word (LSB must be 1) |
| `USERCODE_VALUE` | `32'h0` | USERCODE word |

For another circuit, set `N_IN` and `N_OUT` to its pin counts. The ISCAS'89
pin counts (with pads) used in `tb_iscas89_sizes` range from s27 at 11/2 to
s35932 at 42/321 and s15850 at 84/151. The IR width is fixed at 4 bits, in
`jtag_pkg`.

## Where this follows the standard and where it makes its own choices

These parts follow IEEE 1149.1:

- The overall structure: TAP controller, IR and decoder, bypass, ID and
  boundary registers, and a TDO multiplexer
- The 16-state TAP controller and its transitions
- The list of instructions
- The PRIVATE-x extension

These are choices made in this design:

- Opcode values, and the 4-bit IR width
- IDCODE and USERCODE values
- Boundary-chain order and cell structure
- Private register behaviour (capture a core value, write it back with a load
  strobe) and its width
- Falling-edge update and TDO timing, taken from the standard
- Using `pin_oe` to represent HIGHZ
- Clock enables in place of gated test clocks

Other differences:

- The controller does not pass TCK out as one of its control outputs. Registers
  use TCK directly.
- RUNBIST is absent.
- Nothing here reproduces the FPGA figures (slice counts, power, speed) that
  accompany the design.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_tap_controller` runs 3000 random TMS steps against a transition table. It
  then checks the five-TMS reset from all 16 states, and TRST_N.
- The register testbenches drive `tap_ctrl_t` directly. Each compares against a
  small reference model.
- `tb_jtag_controller` is the end-to-end test at default parameters, driven
  only through the TAP pins. The core is an s27 model, `tb/s27_model.sv`.
  - It runs every instruction.
  - It checks s27's G17 output under INTEST against s27's gate equations.
  - It reads and writes the s27 flip-flops through PRIVATE-0.
  - It pauses a DR scan and an IR scan.
  - It resets by TMS and by TRST_N.
  - It counts each of these mechanisms, and fails if one never happened.
- `tb_iscas89_sizes` builds 27 controllers, one per ISCAS'89 pin count, on
  shared TAP pins. It checks IDCODE, BYPASS, SAMPLE and PRELOAD+EXTEST on each.
- `tb_daisy_chain` puts two controllers on one board chain, with the first
  one's TDO feeding the second one's TDI.
  - Their IRs load through one 8-bit IR scan.
  - The two IDCODEs read back to back.
  - With one device in BYPASS, the data path is the other device's 13 cells
    plus a single bit.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/jtag_pkg.sv \
    tb/tb_jtag_controller.sv --top-module tb_jtag_controller
./obj_dir/Vtb_jtag_controller
```

Any other testbench builds the same way: substitute its name.
