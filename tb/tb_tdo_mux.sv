// tb_tdo_mux: the selected serial output reaches TDO at the falling TCK edge,
// the IR path wins in IR states, TDO and its enable are low outside shifting.
module tb_tdo_mux;
  import jtag_pkg::*;

  localparam int NP = 3;
  logic tck = 1'b0, trst_n = 1'b1, tdo, tdo_en;
  tap_ctrl_t ctrl = '0;
  dr_sel_t dr_sel = DR_BYPASS;
  logic [2:0] priv_idx = '0;
  logic ir_so = 0, bsr_so = 0, byp_so = 0, id_so = 0, user_so = 0;
  logic [NP-1:0] priv_so = '0;
  int checks = 0, failures = 0;

  tdo_mux #(.NUM_PRIVATE(NP)) dut (.tck, .trst_n, .ctrl, .dr_sel, .priv_idx, .ir_so,
    .bsr_so, .byp_so, .id_so, .user_so, .priv_so, .tdo, .tdo_en);

  initial begin
    logic exp, exp_en, old, old_en;
    #1 trst_n = 1'b0;
    #1 trst_n = 1'b1;
    repeat (3000) begin
      ctrl = '0;
      ctrl.enable    = 1'($urandom);
      ctrl.select_ir = 1'($urandom);
      dr_sel   = dr_sel_t'($urandom_range(0, 4));
      priv_idx = 3'($urandom_range(0, NP - 1));
      {ir_so, bsr_so, byp_so, id_so, user_so} = 5'($urandom);
      priv_so  = NP'($urandom);
      if (ctrl.select_ir)               exp = ir_so;
      else if (dr_sel == DR_BOUNDARY)   exp = bsr_so;
      else if (dr_sel == DR_IDCODE)     exp = id_so;
      else if (dr_sel == DR_USERCODE)   exp = user_so;
      else if (dr_sel == DR_PRIVATE)    exp = priv_so[priv_idx];
      else                              exp = byp_so;
      if (!ctrl.enable) exp = 1'b0;
      exp_en = ctrl.enable;
      old = tdo; old_en = tdo_en;
      #4 tck = 1'b1;
      #1 checks++;
      if (tdo !== old || tdo_en !== old_en) begin
        failures++; $display("FAIL: TDO changed on rising edge");
      end
      #4 tck = 1'b0;
      #1 checks++;
      if (tdo !== exp || tdo_en !== exp_en) begin
        failures++;
        $display("FAIL: tdo %b en %b expected %b %b (sel %s ir %b)", tdo, tdo_en, exp, exp_en,
                 dr_sel.name(), ctrl.select_ir);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
