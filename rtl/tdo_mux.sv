// tdo_mux: the output multiplexer in front of TDO.
//
// In IR states the instruction register's serial output is chosen, otherwise
// the data register the decoder selected. The choice is retimed on the falling
// edge of TCK, as the standard requires, so TDO is stable around the next
// rising edge where the host samples it. tdo_en, retimed the same way, is high
// while shifting; when it is low tdo is held at 0 (a pad would be tri-stated).
//
// Interface: ctrl, dr_sel, and the serial outputs of the IR and of each data
// register in (priv_so indexed by priv_idx); tdo and tdo_en out.
module tdo_mux
  import jtag_pkg::*;
#(
  parameter int NUM_PRIVATE = 1
) (
  input  logic                   tck,
  input  logic                   trst_n,
  input  tap_ctrl_t              ctrl,
  input  dr_sel_t                dr_sel,
  input  logic [2:0]             priv_idx,
  input  logic                   ir_so,
  input  logic                   bsr_so,
  input  logic                   byp_so,
  input  logic                   id_so,
  input  logic                   user_so,
  input  logic [NUM_PRIVATE-1:0] priv_so,
  output logic                   tdo,
  output logic                   tdo_en
);

  logic dr_so, so;

  logic priv_bit;

  always_comb begin
    priv_bit = 1'b0;
    for (int p = 0; p < NUM_PRIVATE; p++)
      if (int'(priv_idx) == p) priv_bit = priv_so[p];
    unique case (dr_sel)
      DR_BOUNDARY: dr_so = bsr_so;
      DR_IDCODE:   dr_so = id_so;
      DR_USERCODE: dr_so = user_so;
      DR_PRIVATE:  dr_so = priv_bit;
      default:     dr_so = byp_so;
    endcase
    so = ctrl.select_ir ? ir_so : dr_so;
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) begin
      tdo    <= 1'b0;
      tdo_en <= 1'b0;
    end else begin
      tdo    <= ctrl.enable ? so : 1'b0;
      tdo_en <= ctrl.enable;
    end
  end

endmodule
