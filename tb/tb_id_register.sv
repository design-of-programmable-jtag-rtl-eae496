// tb_id_register: after Capture-DR the 32-bit value leaves LSB first, then the
// bits shifted in at TDI follow 32 TCK later; no change while not selected.
module tb_id_register;
  import jtag_pkg::*;

  localparam logic [31:0] V = 32'h4BA0_0477;
  logic tck = 1'b0, trst_n = 1'b1, tdi = 1'b0, sel = 1'b1, so;
  tap_ctrl_t ctrl = '0;
  int checks = 0, failures = 0;

  id_register #(.WIDTH(32), .VALUE(V)) dut (.tck, .trst_n, .ctrl, .sel, .tdi, .so);

  task automatic rise(); #4 tck = 1'b1; #5 tck = 1'b0; #1; endtask

  initial begin
    logic [31:0] got, pat;
    #1 trst_n = 1'b0;
    #1 trst_n = 1'b1;
    repeat (10) begin
      pat = $urandom;
      sel = 1'b1;
      ctrl = '0; ctrl.capture_dr = 1; ctrl.clock_dr = 1;
      rise();
      ctrl = '0; ctrl.shift_dr = 1; ctrl.clock_dr = 1;
      for (int i = 0; i < 32; i++) begin got[i] = so; tdi = pat[i]; rise(); end
      checks++;
      if (got !== V) begin failures++; $display("FAIL: read %h expected %h", got, V); end
      // not selected: shifting must not move the register
      sel = 1'b0;
      repeat (5) begin tdi = 1'($urandom); rise(); end
      sel = 1'b1;
      for (int i = 0; i < 32; i++) begin got[i] = so; tdi = 1'b0; rise(); end
      checks++;
      if (got !== pat) begin failures++; $display("FAIL: loop-through %h expected %h", got, pat); end
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
