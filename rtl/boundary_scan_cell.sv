// boundary_scan_cell: one cell of the boundary-scan register.
//
// Two flip-flops and a multiplexer. The capture/shift stage loads data_in in
// Capture-DR and scan_in in Shift-DR (rising TCK, only while the boundary
// register is selected). The update stage copies it on the falling TCK edge in
// Update-DR. data_out is data_in in normal operation and the update stage when
// mode is 1. This is the usual two-stage cell; the document shows cells only as
// boxes in a chain.
//
// Interface: ctrl, sel, mode, data_in, scan_in in; scan_out, data_out out.
module boundary_scan_cell
  import jtag_pkg::*;
(
  input  logic      tck,
  input  logic      trst_n,
  input  tap_ctrl_t ctrl,
  input  logic      sel,
  input  logic      mode,
  input  logic      data_in,
  input  logic      scan_in,
  output logic      scan_out,
  output logic      data_out
);

  logic upd;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                     scan_out <= 1'b0;
    else if (sel && ctrl.capture_dr) scan_out <= data_in;
    else if (sel && ctrl.shift_dr)   scan_out <= scan_in;
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n)                    upd <= 1'b0;
    else if (sel && ctrl.update_dr) upd <= scan_out;
  end

  assign data_out = mode ? upd : data_in;

endmodule
