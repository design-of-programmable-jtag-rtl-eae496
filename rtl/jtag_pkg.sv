// jtag_pkg: types and constants shared by the JTAG controller.
//
// The sixteen TAP states are the IEEE 1149.1 states (the standard state
// diagram). The state codes, the instruction width and the opcode values are
// this design's own choices: only BYPASS = all ones is fixed by the standard.
// PRIVATE-X instructions occupy the codes 1000..1110, one private data register
// each; the controller instantiates NUM_PRIVATE of them (default one).
package jtag_pkg;

  typedef enum logic [3:0] {
    TEST_LOGIC_RESET = 4'hF,
    RUN_TEST_IDLE    = 4'hC,
    SELECT_DR_SCAN   = 4'h7,
    CAPTURE_DR       = 4'h6,
    SHIFT_DR         = 4'h2,
    EXIT1_DR         = 4'h1,
    PAUSE_DR         = 4'h3,
    EXIT2_DR         = 4'h0,
    UPDATE_DR        = 4'h5,
    SELECT_IR_SCAN   = 4'h4,
    CAPTURE_IR       = 4'hE,
    SHIFT_IR         = 4'hA,
    EXIT1_IR         = 4'h9,
    PAUSE_IR         = 4'hB,
    EXIT2_IR         = 4'h8,
    UPDATE_IR        = 4'hD
  } tap_state_t;

  // Moore outputs of the TAP controller. Capture/shift are enables sampled on
  // the rising edge of TCK; update strobes act on the falling edge.
  typedef struct packed {
    logic reset;      // Test-Logic-Reset: clears instruction and test logic
    logic enable;     // TDO driver enable (Shift-DR or Shift-IR)
    logic select_ir;  // IR path (as opposed to DR path) feeds TDO
    logic clock_dr;   // a DR stage loads this edge (capture or shift)
    logic capture_dr;
    logic shift_dr;
    logic update_dr;
    logic clock_ir;
    logic capture_ir;
    logic shift_ir;
    logic update_ir;
  } tap_ctrl_t;

  localparam int IR_WIDTH = 4;
  typedef logic [IR_WIDTH-1:0] instr_t;

  localparam instr_t EXTEST         = 4'b0000;
  localparam instr_t SAMPLE_PRELOAD = 4'b0001;
  localparam instr_t IDCODE         = 4'b0010;
  localparam instr_t USERCODE       = 4'b0011;
  localparam instr_t INTEST         = 4'b0100;
  localparam instr_t CLAMP          = 4'b0101;
  localparam instr_t HIGHZ          = 4'b0110;
  localparam instr_t PRIVATE_BASE   = 4'b1000;  // PRIVATE-x = PRIVATE_BASE + x
  localparam instr_t BYPASS         = 4'b1111;

  localparam int MAX_PRIVATE = 7;  // codes 1000..1110

  // Data register placed between TDI and TDO.
  typedef enum logic [2:0] {
    DR_BYPASS   = 3'd0,
    DR_BOUNDARY = 3'd1,
    DR_IDCODE   = 3'd2,
    DR_USERCODE = 3'd3,
    DR_PRIVATE  = 3'd4
  } dr_sel_t;

  typedef struct packed {
    dr_sel_t    dr;        // selected data register
    logic [2:0] priv_idx;  // which PRIVATE-x register when dr == DR_PRIVATE
    logic       mode_in;   // input cells drive the core from their update stage
    logic       mode_out;  // output cells drive the pads from their update stage
    logic       oe;        // output pads enabled
  } decode_t;

endpackage
