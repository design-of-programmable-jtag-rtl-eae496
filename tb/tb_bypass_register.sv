// tb_bypass_register: the bypass bit captures 0, delays TDI by one TCK while
// shifting, and holds its value when not selected.
module tb_bypass_register;
  import jtag_pkg::*;

  logic tck = 1'b0, trst_n = 1'b1, tdi = 1'b0, sel = 1'b1, so;
  tap_ctrl_t ctrl = '0;
  int checks = 0, failures = 0;

  bypass_register dut (.tck, .trst_n, .ctrl, .sel, .tdi, .so);

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %b expected %b", what, got, exp);
    end
  endtask

  task automatic rise(); #4 tck = 1'b1; #5 tck = 1'b0; #1; endtask

  initial begin
    logic prev;
    #1 trst_n = 1'b0;
    #1 trst_n = 1'b1;
    repeat (50) begin
      automatic int n = $urandom_range(1, 20);
      sel = 1'b1;
      tdi = 1'b1;
      ctrl = '0; ctrl.capture_dr = 1; ctrl.clock_dr = 1;
      rise();
      chk(so, 1'b0, "captured");
      ctrl = '0; ctrl.shift_dr = 1; ctrl.clock_dr = 1;
      repeat (n) begin
        tdi = 1'($urandom);
        prev = tdi;
        rise();
        chk(so, prev, "one-cycle delay");
      end
      sel = 1'b0;
      repeat (3) begin
        tdi = ~so;
        rise();
        chk(so, prev, "hold when not selected");
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
