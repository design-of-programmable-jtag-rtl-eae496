// bypass_register: the one-bit bypass data register.
//
// When selected it loads 0 in Capture-DR and takes TDI on each rising TCK in
// Shift-DR, so a device that takes no part in a test adds a single bit to the
// scan path. Behaviour as the standard defines it.
//
// Interface: ctrl from the TAP controller, sel from the instruction decoder,
// tdi in, so out (one TCK of delay).
module bypass_register
  import jtag_pkg::*;
(
  input  logic      tck,
  input  logic      trst_n,
  input  tap_ctrl_t ctrl,
  input  logic      sel,
  input  logic      tdi,
  output logic      so
);

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                    so <= 1'b0;
    else if (sel && ctrl.capture_dr) so <= 1'b0;
    else if (sel && ctrl.shift_dr)   so <= tdi;
  end

endmodule
