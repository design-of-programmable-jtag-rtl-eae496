// instruction_register: the JTAG instruction register.
//
// A shift stage sits between TDI and the TDO multiplexer during IR scans: it
// loads the fixed pattern CAPTURE_VALUE (two LSBs 01, as the standard requires
// so that a host can find the IR length) in Capture-IR and shifts toward bit 0
// in Shift-IR, one bit per rising TCK. On the falling TCK edge in Update-IR the
// shift stage is copied into the holding stage, whose value is the current
// instruction. Test-Logic-Reset (or TRST_N) loads RESET_INSTR, IDCODE by
// default, as the standard asks of a device that has an ID register. The width
// and capture pattern beyond the two LSBs are this design's choice.
//
// Interface: ctrl from the TAP controller, tdi in, so (shift-stage bit 0) out,
// instr out. The new instruction appears half a TCK cycle into Update-IR.
module instruction_register
  import jtag_pkg::*;
#(
  parameter int              WIDTH         = IR_WIDTH,
  parameter logic [WIDTH-1:0] CAPTURE_VALUE = WIDTH'(2'b01),
  parameter logic [WIDTH-1:0] RESET_INSTR   = WIDTH'(IDCODE)
) (
  input  logic             tck,
  input  logic             trst_n,
  input  tap_ctrl_t        ctrl,
  input  logic             tdi,
  output logic             so,
  output logic [WIDTH-1:0] instr
);

  logic [WIDTH-1:0] sr;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)              sr <= CAPTURE_VALUE;
    else if (ctrl.capture_ir) sr <= CAPTURE_VALUE;
    else if (ctrl.shift_ir)   sr <= {tdi, sr[WIDTH-1:1]};
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n)             instr <= RESET_INSTR;
    else if (ctrl.reset)     instr <= RESET_INSTR;
    else if (ctrl.update_ir) instr <= sr;
  end

  assign so = sr[0];

endmodule
