// private_register: data register reached by a PRIVATE-x instruction.
//
// It gives the tester read and write access to a register inside the core.
// While selected it loads par_in (the core register) in Capture-DR, shifts
// toward bit 0 in Shift-DR and, on the falling TCK edge in Update-DR, copies
// the shifted value to par_out. load is high for the Update-DR state so the
// core can take par_out. The document names the PRIVATE-X instructions and
// shows an internal core register on the scan path; the capture/update
// behaviour and the width are this design's choice.
//
// Interface: ctrl, sel, tdi, par_in in; so, par_out, load out.
module private_register
  import jtag_pkg::*;
#(
  parameter int WIDTH = 8
) (
  input  logic             tck,
  input  logic             trst_n,
  input  tap_ctrl_t        ctrl,
  input  logic             sel,
  input  logic             tdi,
  output logic             so,
  input  logic [WIDTH-1:0] par_in,
  output logic [WIDTH-1:0] par_out,
  output logic             load
);

  logic [WIDTH-1:0] sr;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                     sr <= '0;
    else if (sel && ctrl.capture_dr) sr <= par_in;
    else if (sel && ctrl.shift_dr)   sr <= {tdi, sr[WIDTH-1:1]};
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n)                    par_out <= '0;
    else if (sel && ctrl.update_dr) par_out <= sr;
  end

  assign so   = sr[0];
  assign load = sel && ctrl.update_dr;

endmodule
