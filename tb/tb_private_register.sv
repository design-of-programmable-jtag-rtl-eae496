// tb_private_register: the PRIVATE-x register reads a core value, writes a new
// one on Update-DR with a one-state load strobe, and ignores TAP activity
// while not selected.
module tb_private_register;
  import jtag_pkg::*;

  localparam int W = 8;
  logic tck = 1'b0, trst_n = 1'b1, sel = 1'b1, tdi = 1'b0, so, load;
  logic [W-1:0] par_in = '0, par_out;
  tap_ctrl_t ctrl = '0;
  int checks = 0, failures = 0;

  private_register #(.WIDTH(W)) dut (.tck, .trst_n, .ctrl, .sel, .tdi, .so,
                                     .par_in, .par_out, .load);

  task automatic rise(); #4 tck = 1'b1; #5 tck = 1'b0; #1; endtask

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [W-1:0] wr, got, old;
    #1 trst_n = 1'b0;
    #1 trst_n = 1'b1;
    chk(par_out, 0, "reset value");
    repeat (100) begin
      par_in = W'($urandom);
      wr     = W'($urandom);
      sel    = 1'b1;
      ctrl = '0; ctrl.capture_dr = 1; ctrl.clock_dr = 1;
      rise();
      ctrl = '0; ctrl.shift_dr = 1; ctrl.clock_dr = 1;
      for (int i = 0; i < W; i++) begin got[i] = so; tdi = wr[i]; rise(); end
      chk(got, par_in, "read core register");
      old = par_out;
      chk(load, 0, "no load while shifting");
      ctrl = '0; ctrl.update_dr = 1;
      #1 chk(load, 1, "load in Update-DR");
      #3 tck = 1'b1;
      #1 chk(par_out, old, "par_out before falling edge");
      #4 tck = 1'b0;
      #1 chk(par_out, wr, "par_out after Update-DR");
      ctrl = '0;
      #1 chk(load, 0, "load after Update-DR");
      // deselected update must not change par_out
      sel = 1'b0;
      ctrl = '0; ctrl.update_dr = 1;
      #1 chk(load, 0, "no load while deselected");
      rise();
      chk(par_out, wr, "par_out kept while deselected");
      ctrl = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
