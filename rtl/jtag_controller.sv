// jtag_controller: a programmable IEEE 1149.1 JTAG controller.
//
// One controller, sized by parameters, that can be wrapped around any core:
// N_IN and N_OUT set the number of input and output boundary-scan cells (the
// core's pins), NUM_PRIVATE and PRIV_WIDTH the PRIVATE-x data registers that
// reach registers inside the core, and IDCODE_VALUE / USERCODE_VALUE the
// identification words. Defaults size it for the s27 benchmark (11 inputs and
// 2 outputs as counted with pads); the s27 netlist itself is not part of it.
//
// Structure: the TAP controller steps through the 16 TAP states under TMS;
// the instruction register (4 bits) and its decoder pick one of the bypass,
// boundary-scan, IDCODE, USERCODE or private registers to sit between TDI and
// TDO; the TDO multiplexer retimes the chosen serial output on falling TCK.
// Instructions: EXTEST, SAMPLE/PRELOAD, BYPASS (mandatory), IDCODE, USERCODE,
// INTEST, CLAMP, HIGHZ and PRIVATE-x. RUNBIST is not implemented (no self test
// is defined for the core); its code falls back to BYPASS.
//
// Timing: all capture and shift on rising TCK, update stages and TDO on falling
// TCK, TRST_N asynchronous. Core-side signals are combinational through the
// boundary cells' mode multiplexers.
module jtag_controller
  import jtag_pkg::*;
#(
  parameter int           N_IN           = 11,
  parameter int           N_OUT          = 2,
  parameter int           NUM_PRIVATE    = 1,
  parameter int           PRIV_WIDTH     = 8,
  parameter logic [31:0]  IDCODE_VALUE   = 32'h1000_0001,
  parameter logic [31:0]  USERCODE_VALUE = 32'h0000_0000
) (
  input  logic                                   tck,
  input  logic                                   trst_n,
  input  logic                                   tms,
  input  logic                                   tdi,
  output logic                                   tdo,
  output logic                                   tdo_en,
  // pads and core
  input  logic [N_IN-1:0]                        pin_in,
  output logic [N_IN-1:0]                        core_in,
  input  logic [N_OUT-1:0]                       core_out,
  output logic [N_OUT-1:0]                       pin_out,
  output logic                                   pin_oe,
  // core registers reached by PRIVATE-x
  input  logic [NUM_PRIVATE-1:0][PRIV_WIDTH-1:0] priv_in,
  output logic [NUM_PRIVATE-1:0][PRIV_WIDTH-1:0] priv_out,
  output logic [NUM_PRIVATE-1:0]                 priv_load
);

  tap_state_t state;
  tap_ctrl_t  ctrl;
  instr_t     instr;
  decode_t    dec;

  logic ir_so, bsr_so, byp_so, id_so, user_so;
  logic [NUM_PRIVATE-1:0] priv_so;

  tap_controller u_tap (
    .tck    (tck),
    .trst_n (trst_n),
    .tms    (tms),
    .state  (state),
    .ctrl   (ctrl)
  );

  instruction_register #(.WIDTH(IR_WIDTH)) u_ir (
    .tck    (tck),
    .trst_n (trst_n),
    .ctrl   (ctrl),
    .tdi    (tdi),
    .so     (ir_so),
    .instr  (instr)
  );

  instruction_decoder #(.NUM_PRIVATE(NUM_PRIVATE)) u_dec (
    .instr (instr),
    .dec   (dec)
  );

  bypass_register u_bypass (
    .tck    (tck),
    .trst_n (trst_n),
    .ctrl   (ctrl),
    .sel    (dec.dr == DR_BYPASS),
    .tdi    (tdi),
    .so     (byp_so)
  );

  id_register #(.WIDTH(32), .VALUE(IDCODE_VALUE)) u_idcode (
    .tck    (tck),
    .trst_n (trst_n),
    .ctrl   (ctrl),
    .sel    (dec.dr == DR_IDCODE),
    .tdi    (tdi),
    .so     (id_so)
  );

  id_register #(.WIDTH(32), .VALUE(USERCODE_VALUE)) u_usercode (
    .tck    (tck),
    .trst_n (trst_n),
    .ctrl   (ctrl),
    .sel    (dec.dr == DR_USERCODE),
    .tdi    (tdi),
    .so     (user_so)
  );

  boundary_scan_register #(.N_IN(N_IN), .N_OUT(N_OUT)) u_bsr (
    .tck      (tck),
    .trst_n   (trst_n),
    .ctrl     (ctrl),
    .sel      (dec.dr == DR_BOUNDARY),
    .mode_in  (dec.mode_in),
    .mode_out (dec.mode_out),
    .tdi      (tdi),
    .so       (bsr_so),
    .pin_in   (pin_in),
    .core_in  (core_in),
    .core_out (core_out),
    .pin_out  (pin_out)
  );

  assign pin_oe = dec.oe;

  for (genvar p = 0; p < NUM_PRIVATE; p++) begin : g_priv
    private_register #(.WIDTH(PRIV_WIDTH)) u_priv (
      .tck     (tck),
      .trst_n  (trst_n),
      .ctrl    (ctrl),
      .sel     (dec.dr == DR_PRIVATE && int'(dec.priv_idx) == p),
      .tdi     (tdi),
      .so      (priv_so[p]),
      .par_in  (priv_in[p]),
      .par_out (priv_out[p]),
      .load    (priv_load[p])
    );
  end

  tdo_mux #(.NUM_PRIVATE(NUM_PRIVATE)) u_tdo (
    .tck      (tck),
    .trst_n   (trst_n),
    .ctrl     (ctrl),
    .dr_sel   (dec.dr),
    .priv_idx (dec.priv_idx),
    .ir_so    (ir_so),
    .bsr_so   (bsr_so),
    .byp_so   (byp_so),
    .id_so    (id_so),
    .user_so  (user_so),
    .priv_so  (priv_so),
    .tdo      (tdo),
    .tdo_en   (tdo_en)
  );

  if (NUM_PRIVATE < 1 || NUM_PRIVATE > MAX_PRIVATE) begin : g_bad_num_private
    $error("NUM_PRIVATE must lie in 1..%0d", MAX_PRIVATE);
  end

endmodule
