// tb_boundary_scan_cell: capture, shift, falling-edge update and the mode
// multiplexer of one cell, with random data, against a two-register model.
module tb_boundary_scan_cell;
  import jtag_pkg::*;

  logic tck = 1'b0, trst_n = 1'b1, sel = 1'b1, mode = 1'b0;
  logic data_in = 1'b0, scan_in = 1'b0, scan_out, data_out;
  tap_ctrl_t ctrl = '0;
  logic m_cap, m_upd;   // model of the two stages
  int checks = 0, failures = 0;

  boundary_scan_cell dut (.tck, .trst_n, .ctrl, .sel, .mode, .data_in, .scan_in,
                          .scan_out, .data_out);

  task automatic chk(input string what);
    checks++;
    if (scan_out !== m_cap || data_out !== (mode ? m_upd : data_in)) begin
      failures++;
      $display("FAIL: %s scan_out %b/%b data_out %b/%b", what, scan_out, m_cap,
               data_out, mode ? m_upd : data_in);
    end
  endtask

  initial begin
    #1 trst_n = 1'b0;
    #1 trst_n = 1'b1;
    m_cap = 1'b0; m_upd = 1'b0;
    repeat (2000) begin
      automatic int op = $urandom_range(0, 3);
      ctrl = '0;
      sel     = ($urandom_range(0, 3) != 0);
      mode    = 1'($urandom);
      data_in = 1'($urandom);
      scan_in = 1'($urandom);
      case (op)
        0: begin ctrl.capture_dr = 1; ctrl.clock_dr = 1; end
        1: begin ctrl.shift_dr = 1; ctrl.clock_dr = 1; end
        2: ctrl.update_dr = 1;
        default: ;
      endcase
      #1 chk("before edge");
      #3 tck = 1'b1;
      if (sel && op == 0) m_cap = data_in;
      if (sel && op == 1) m_cap = scan_in;
      #1 chk("after rising edge");
      #4 tck = 1'b0;
      if (sel && op == 2) m_upd = m_cap;
      #1 chk("after falling edge");
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
