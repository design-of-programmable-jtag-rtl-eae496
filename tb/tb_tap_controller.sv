// tb_tap_controller: checks the TAP state machine against a transition table.
//
// The table below is written out from the standard TAP state diagram, keyed by
// state name, and the expected Moore outputs are derived from the state names.
// The test applies TRST_N, then 3000 rising TCK edges with random TMS, comparing
// state and every control output after each edge; then, from every one of the
// 16 states, five TMS=1 edges must land in Test-Logic-Reset; then an
// asynchronous TRST_N pulse in mid-scan.
module tb_tap_controller;
  import jtag_pkg::*;

  logic tck = 1'b0, trst_n = 1'b1, tms = 1'b1;
  tap_state_t state;
  tap_ctrl_t  ctrl;
  int checks = 0, failures = 0;

  tap_controller dut (.tck, .trst_n, .tms, .state, .ctrl);

  tap_state_t nxt [tap_state_t][2];
  tap_state_t model;

  initial begin
    nxt[TEST_LOGIC_RESET] = '{RUN_TEST_IDLE, TEST_LOGIC_RESET};
    nxt[RUN_TEST_IDLE]    = '{RUN_TEST_IDLE, SELECT_DR_SCAN};
    nxt[SELECT_DR_SCAN]   = '{CAPTURE_DR,    SELECT_IR_SCAN};
    nxt[CAPTURE_DR]       = '{SHIFT_DR,      EXIT1_DR};
    nxt[SHIFT_DR]         = '{SHIFT_DR,      EXIT1_DR};
    nxt[EXIT1_DR]         = '{PAUSE_DR,      UPDATE_DR};
    nxt[PAUSE_DR]         = '{PAUSE_DR,      EXIT2_DR};
    nxt[EXIT2_DR]         = '{SHIFT_DR,      UPDATE_DR};
    nxt[UPDATE_DR]        = '{RUN_TEST_IDLE, SELECT_DR_SCAN};
    nxt[SELECT_IR_SCAN]   = '{CAPTURE_IR,    TEST_LOGIC_RESET};
    nxt[CAPTURE_IR]       = '{SHIFT_IR,      EXIT1_IR};
    nxt[SHIFT_IR]         = '{SHIFT_IR,      EXIT1_IR};
    nxt[EXIT1_IR]         = '{PAUSE_IR,      UPDATE_IR};
    nxt[PAUSE_IR]         = '{PAUSE_IR,      EXIT2_IR};
    nxt[EXIT2_IR]         = '{SHIFT_IR,      UPDATE_IR};
    nxt[UPDATE_IR]        = '{RUN_TEST_IDLE, SELECT_DR_SCAN};
  end

  function automatic void check_outputs(tap_state_t s);
    string n = s.name();
    tap_ctrl_t e = '0;
    e.reset      = (n == "TEST_LOGIC_RESET");
    e.capture_dr = (n == "CAPTURE_DR");
    e.shift_dr   = (n == "SHIFT_DR");
    e.update_dr  = (n == "UPDATE_DR");
    e.capture_ir = (n == "CAPTURE_IR");
    e.shift_ir   = (n == "SHIFT_IR");
    e.update_ir  = (n == "UPDATE_IR");
    e.clock_dr   = e.capture_dr || e.shift_dr;
    e.clock_ir   = e.capture_ir || e.shift_ir;
    e.enable     = e.shift_dr || e.shift_ir;
    e.select_ir  = n.len() > 3 && n.substr(n.len()-3, n.len()-1) == "_IR" ||
                   n == "SELECT_IR_SCAN";
    checks++;
    if (state !== s || ctrl !== e) begin
      failures++;
      $display("FAIL: state %s ctrl %b, expected %s ctrl %b", state.name(), ctrl, n, e);
    end
  endfunction

  task automatic step(input logic t);
    tms = t;
    #5 tck = 1'b1;
    model = nxt[model][t];
    #1 check_outputs(model);
    #4 tck = 1'b0;
  endtask

  int visited [tap_state_t];

  initial begin
    #2 trst_n = 1'b0;
    #8 model = TEST_LOGIC_RESET;
    check_outputs(model);
    trst_n = 1'b1;
    repeat (3000) begin
      step(1'($urandom_range(0, 99) < 40));
      visited[model] = 1;
    end
    checks++;
    if (visited.num() != 16) begin
      failures++;
      $display("FAIL: only %0d states visited", visited.num());
    end
    // five TMS=1 edges from every state
    foreach (nxt[s]) begin
      automatic tap_state_t target = s;
      // walk to s: reset, then breadth-limited random walk until we hit it
      repeat (5) step(1'b1);
      while (model != target) step(1'($urandom_range(0, 1)));
      repeat (5) step(1'b1);
      checks++;
      if (state != TEST_LOGIC_RESET) begin
        failures++;
        $display("FAIL: five TMS=1 from %s ended in %s", target.name(), state.name());
      end
    end
    // asynchronous reset from Shift-DR
    step(0); step(1); step(0); step(0);
    #2 trst_n = 1'b0;
    #1 model = TEST_LOGIC_RESET;
    check_outputs(model);
    #2 trst_n = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
