// tb_instruction_register: checks capture, shift, update and reset of the IR.
//
// The TAP controls are driven directly. Each round captures (expect 0001 to
// leave TDO first, LSB first), shifts a random instruction in, checks that the
// held instruction does not change before Update-IR and takes the new value at
// the falling edge of Update-IR. Test-Logic-Reset must restore IDCODE.
module tb_instruction_register;
  import jtag_pkg::*;

  logic tck = 1'b0, trst_n = 1'b1, tdi = 1'b0, so;
  tap_ctrl_t ctrl = '0;
  instr_t instr;
  int checks = 0, failures = 0;

  instruction_register dut (.tck, .trst_n, .ctrl, .tdi, .so, .instr);

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic rise(); #4 tck = 1'b1; #5 tck = 1'b0; #1; endtask

  initial begin
    #1 trst_n = 1'b0;
    #1 chk(instr, IDCODE, "after TRST");
    trst_n = 1'b1;
    repeat (200) begin
      automatic instr_t v = instr_t'($urandom);
      automatic instr_t prev_instr = instr;
      automatic instr_t seen = '0;
      ctrl = '0; ctrl.capture_ir = 1'b1; ctrl.clock_ir = 1'b1; ctrl.select_ir = 1'b1;
      rise();
      ctrl = '0; ctrl.shift_ir = 1'b1; ctrl.clock_ir = 1'b1; ctrl.select_ir = 1'b1;
      for (int i = 0; i < IR_WIDTH; i++) begin
        seen[i] = so;
        tdi = v[i];
        rise();
      end
      chk(seen, 4'b0001, "captured pattern");
      chk(instr, prev_instr, "instruction before update");
      ctrl = '0; ctrl.update_ir = 1'b1; ctrl.select_ir = 1'b1;
      #5 tck = 1'b1;
      #1 chk(instr, prev_instr, "instruction before falling edge");
      #4 tck = 1'b0;
      #1 chk(instr, v, "instruction after Update-IR");
      ctrl = '0;
      rise();
      chk(instr, v, "instruction held");
      if ($urandom_range(0, 9) == 0) begin
        ctrl.reset = 1'b1;
        rise();
        chk(instr, IDCODE, "after Test-Logic-Reset");
        ctrl = '0;
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
