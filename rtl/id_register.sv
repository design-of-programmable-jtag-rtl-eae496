// id_register: a fixed-value identification data register (IDCODE/USERCODE).
//
// When selected it loads VALUE in Capture-DR and shifts toward bit 0 in
// Shift-DR, TDI entering at the top, so VALUE leaves TDO LSB first. It has no
// update stage. The 32-bit width follows the standard; VALUE is a parameter
// (the default has the LSB set, as the standard requires of an IDCODE).
//
// Interface: ctrl, sel, tdi in; so out.
module id_register
  import jtag_pkg::*;
#(
  parameter int               WIDTH = 32,
  parameter logic [WIDTH-1:0] VALUE = 32'h1000_0001
) (
  input  logic      tck,
  input  logic      trst_n,
  input  tap_ctrl_t ctrl,
  input  logic      sel,
  input  logic      tdi,
  output logic      so
);

  logic [WIDTH-1:0] sr;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                     sr <= VALUE;
    else if (sel && ctrl.capture_dr) sr <= VALUE;
    else if (sel && ctrl.shift_dr)   sr <= {tdi, sr[WIDTH-1:1]};
  end

  assign so = sr[0];

endmodule
