// tap_controller: the 16-state TAP finite-state machine.
//
// A Moore machine stepped by TMS on each rising edge of TCK, with the
// transitions of the standard state diagram: seven DR-scan states, seven
// IR-scan states, Test-Logic-Reset and Run-Test/Idle. Holding TMS high for five
// rising edges reaches Test-Logic-Reset from any state; TRST_N low forces it
// asynchronously. All outputs (the tap_ctrl_t bundle) decode the present state
// only. The state codes are this design's choice; the output set follows the
// nine outputs the controller is described with (reset, enable, clock/shift/
// update for DR and IR), with capture strobes split out of clock-DR/IR.
//
// Interface: tck, trst_n, tms in; state and ctrl out. No latency beyond the
// state register: ctrl changes right after the rising edge that enters a state.
module tap_controller
  import jtag_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  output tap_state_t state,
  output tap_ctrl_t  ctrl
);

  tap_state_t next;

  always_comb begin
    unique case (state)
      TEST_LOGIC_RESET: next = tms ? TEST_LOGIC_RESET : RUN_TEST_IDLE;
      RUN_TEST_IDLE:    next = tms ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      SELECT_DR_SCAN:   next = tms ? SELECT_IR_SCAN   : CAPTURE_DR;
      CAPTURE_DR:       next = tms ? EXIT1_DR         : SHIFT_DR;
      SHIFT_DR:         next = tms ? EXIT1_DR         : SHIFT_DR;
      EXIT1_DR:         next = tms ? UPDATE_DR        : PAUSE_DR;
      PAUSE_DR:         next = tms ? EXIT2_DR         : PAUSE_DR;
      EXIT2_DR:         next = tms ? UPDATE_DR        : SHIFT_DR;
      UPDATE_DR:        next = tms ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      SELECT_IR_SCAN:   next = tms ? TEST_LOGIC_RESET : CAPTURE_IR;
      CAPTURE_IR:       next = tms ? EXIT1_IR         : SHIFT_IR;
      SHIFT_IR:         next = tms ? EXIT1_IR         : SHIFT_IR;
      EXIT1_IR:         next = tms ? UPDATE_IR        : PAUSE_IR;
      PAUSE_IR:         next = tms ? EXIT2_IR         : PAUSE_IR;
      EXIT2_IR:         next = tms ? UPDATE_IR        : SHIFT_IR;
      UPDATE_IR:        next = tms ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      default:          next = TEST_LOGIC_RESET;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) state <= TEST_LOGIC_RESET;
    else         state <= next;
  end

  always_comb begin
    ctrl            = '0;
    ctrl.reset      = (state == TEST_LOGIC_RESET);
    ctrl.capture_dr = (state == CAPTURE_DR);
    ctrl.shift_dr   = (state == SHIFT_DR);
    ctrl.update_dr  = (state == UPDATE_DR);
    ctrl.capture_ir = (state == CAPTURE_IR);
    ctrl.shift_ir   = (state == SHIFT_IR);
    ctrl.update_ir  = (state == UPDATE_IR);
    ctrl.clock_dr   = ctrl.capture_dr | ctrl.shift_dr;
    ctrl.clock_ir   = ctrl.capture_ir | ctrl.shift_ir;
    ctrl.enable     = ctrl.shift_dr | ctrl.shift_ir;
    ctrl.select_ir  = state inside {SELECT_IR_SCAN, CAPTURE_IR, SHIFT_IR, EXIT1_IR,
                                    PAUSE_IR, EXIT2_IR, UPDATE_IR};
  end

  // Five rising edges with TMS high always end in Test-Logic-Reset.
  logic [2:0] tms_ones;
  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                tms_ones <= '0;
    else if (!tms)              tms_ones <= '0;
    else if (tms_ones != 3'd5)  tms_ones <= tms_ones + 3'd1;
  end

  a_five_ones_reset: assert property (@(posedge tck) disable iff (!trst_n)
                                      tms_ones == 3'd5 |-> state == TEST_LOGIC_RESET);

endmodule
