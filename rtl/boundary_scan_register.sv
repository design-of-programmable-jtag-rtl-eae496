// boundary_scan_register: the chain of boundary-scan cells around the core.
//
// N_IN input cells sit between the input pads and the core, N_OUT output cells
// between the core and the output pads; N_IN and N_OUT are the parameters that
// size the controller to the circuit it wraps. Cell k of the chain is input
// cell k for k < N_IN and output cell k-N_IN otherwise. TDI enters the last
// cell and cell 0 drives so, so a vector shifted in LSB first lands with bit k
// in cell k, and captured bit k leaves TDO k-th. mode_in switches the core
// inputs to the input cells' update stages (INTEST), mode_out switches the
// output pads to the output cells' update stages (EXTEST, INTEST, CLAMP).
// The chain order is this design's choice.
//
// Interface: ctrl, sel, mode_in, mode_out, tdi in; so out; parallel pin_in ->
// core_in and core_out -> pin_out paths.
module boundary_scan_register
  import jtag_pkg::*;
#(
  parameter int N_IN  = 11,
  parameter int N_OUT = 2
) (
  input  logic             tck,
  input  logic             trst_n,
  input  tap_ctrl_t        ctrl,
  input  logic             sel,
  input  logic             mode_in,
  input  logic             mode_out,
  input  logic             tdi,
  output logic             so,
  input  logic [N_IN-1:0]  pin_in,
  output logic [N_IN-1:0]  core_in,
  input  logic [N_OUT-1:0] core_out,
  output logic [N_OUT-1:0] pin_out
);

  localparam int N = N_IN + N_OUT;

  logic [N:0]   chain;   // chain[k] is the scan input of cell k
  logic [N-1:0] d_in, d_out, mode;

  assign chain[N] = tdi;
  assign so       = chain[0];

  assign d_in = {core_out, pin_in};
  assign mode = {{N_OUT{mode_out}}, {N_IN{mode_in}}};
  assign core_in = d_out[N_IN-1:0];
  assign pin_out = d_out[N-1:N_IN];

  for (genvar k = 0; k < N; k++) begin : g_cell
    boundary_scan_cell u_cell (
      .tck      (tck),
      .trst_n   (trst_n),
      .ctrl     (ctrl),
      .sel      (sel),
      .mode     (mode[k]),
      .data_in  (d_in[k]),
      .scan_in  (chain[k+1]),
      .scan_out (chain[k]),
      .data_out (d_out[k])
    );
  end

endmodule
