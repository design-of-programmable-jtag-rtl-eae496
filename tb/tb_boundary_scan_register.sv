// tb_boundary_scan_register: sample, preload and drive through the chain.
//
// With the default 11 input and 2 output cells: capture random pad inputs and
// core outputs and read them back LSB first (input cell 0 first); shift a
// random vector in, update, and check that with mode_in / mode_out set the core
// inputs and pads carry it, while with the modes clear they stay transparent.
module tb_boundary_scan_register;
  import jtag_pkg::*;

  localparam int NI = 11, NO = 2, N = NI + NO;
  logic tck = 1'b0, trst_n = 1'b1, sel = 1'b1, mode_in = 1'b0, mode_out = 1'b0;
  logic tdi = 1'b0, so;
  logic [NI-1:0] pin_in = '0, core_in;
  logic [NO-1:0] core_out = '0, pin_out;
  tap_ctrl_t ctrl = '0;
  int checks = 0, failures = 0;

  boundary_scan_register #(.N_IN(NI), .N_OUT(NO)) dut (
    .tck, .trst_n, .ctrl, .sel, .mode_in, .mode_out, .tdi, .so,
    .pin_in, .core_in, .core_out, .pin_out);

  task automatic rise(); #4 tck = 1'b1; #5 tck = 1'b0; #1; endtask

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [N-1:0] cap, pre, got;
    #1 trst_n = 1'b0;
    #1 trst_n = 1'b1;
    repeat (50) begin
      pin_in   = NI'({$urandom, $urandom});
      core_out = NO'($urandom);
      cap = {core_out, pin_in};
      pre = N'({$urandom, $urandom});
      mode_in = 1'b0; mode_out = 1'b0;
      ctrl = '0; ctrl.capture_dr = 1; ctrl.clock_dr = 1;
      rise();
      ctrl = '0; ctrl.shift_dr = 1; ctrl.clock_dr = 1;
      for (int i = 0; i < N; i++) begin got[i] = so; tdi = pre[i]; rise(); end
      chk(64'(got), 64'(cap), "captured chain");
      chk(64'(core_in), 64'(pin_in), "transparent core_in");
      chk(64'(pin_out), 64'(core_out), "transparent pin_out");
      ctrl = '0; ctrl.update_dr = 1;
      rise();
      ctrl = '0;
      mode_in = 1'b1;
      #1 chk(64'(core_in), 64'(pre[NI-1:0]), "core_in from update stage");
      chk(64'(pin_out), 64'(core_out), "pin_out still transparent");
      mode_out = 1'b1;
      #1 chk(64'(pin_out), 64'(pre[N-1:NI]), "pin_out from update stage");
      // deselected: capture must not disturb the chain
      sel = 1'b0;
      ctrl = '0; ctrl.capture_dr = 1; ctrl.clock_dr = 1;
      pin_in = ~pin_in;
      rise();
      ctrl = '0; ctrl.shift_dr = 1; ctrl.clock_dr = 1;
      sel = 1'b1;
      for (int i = 0; i < N; i++) begin got[i] = so; tdi = 1'b0; rise(); end
      chk(64'(got), 64'(pre), "chain kept while deselected");
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
