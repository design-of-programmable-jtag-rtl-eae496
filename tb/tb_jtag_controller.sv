// tb_jtag_controller: end-to-end test of the JTAG controller at its default
// size (11 input and 2 output boundary cells, one 8-bit private register),
// driven only through TCK/TMS/TDI/TRST_N like an external tester would.
//
// The core is the s27 benchmark model: core_in[3:0] feed G0..G3, core_out[0]
// is G17, core_out[1] is driven by the testbench, and the s27 flip-flops are
// the private register's parallel input. Every instruction is run: IDCODE
// after reset, IR capture pattern, BYPASS and an unused opcode, SAMPLE/PRELOAD,
// EXTEST, INTEST (s27 outputs checked against equations in this file),
// PRIVATE-0 read and write, CLAMP, HIGHZ, USERCODE, a scan paused in Pause-DR
// and Pause-IR, and reset by five TMS=1 edges and by TRST_N. Each mechanism is
// counted and one that never happened counts as a failure.
module tb_jtag_controller;
  import jtag_pkg::*;

  localparam int NI = 11, NO = 2, N = NI + NO, PW = 8;
  localparam logic [31:0] ID = 32'h1000_0001;

  logic tck = 1'b0, trst_n = 1'b1, tms = 1'b1, tdi = 1'b0, tdo, tdo_en;
  logic [NI-1:0] pin_in = '0, core_in;
  logic [NO-1:0] core_out, pin_out;
  logic pin_oe;
  logic [0:0][PW-1:0] priv_in, priv_out;
  logic [0:0] priv_load;
  logic sys_clk = 1'b0, sys_rst = 1'b0, out1 = 1'b0;
  logic g17;
  logic [2:0] s27_state;
  int checks = 0, failures = 0;
  int cycles = 0, load_pulses = 0;

  jtag_controller dut (
    .tck, .trst_n, .tms, .tdi, .tdo, .tdo_en,
    .pin_in, .core_in, .core_out, .pin_out, .pin_oe,
    .priv_in, .priv_out, .priv_load);

  s27_model core (.clk(sys_clk), .rst(sys_rst), .g_in(core_in[3:0]), .g17, .state(s27_state));

  assign core_out   = {out1, g17};
  assign priv_in[0] = PW'(s27_state);

  always @(posedge tck) begin
    cycles++;
    if (priv_load[0]) load_pulses++;
  end

  // ---- mechanism counters -------------------------------------------------
  typedef enum int {M_IDCODE_RESET, M_IR_CAPTURE, M_BYPASS, M_UNUSED, M_SAMPLE,
                    M_PRELOAD, M_EXTEST, M_INTEST, M_PRIV_READ, M_PRIV_WRITE,
                    M_CLAMP, M_HIGHZ, M_USERCODE, M_PAUSE_DR, M_PAUSE_IR,
                    M_TMS_RESET, M_TRST, M_NUM} mech_t;
  int mech [M_NUM];

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %h expected %h", what, got, exp);
    end
  endtask

  // ---- tester side --------------------------------------------------------
  // One TCK cycle: TMS/TDI set after the falling edge, TDO sampled before the
  // rising edge.
  task automatic clk_tms(input logic m, input logic d, output logic o);
    tms = m; tdi = d;
    #4 o = tdo;
    tck = 1'b1;
    #5 tck = 1'b0;
    #1;
  endtask

  task automatic tms_seq(input logic [7:0] bits, input int n);
    logic o;
    for (int i = 0; i < n; i++) clk_tms(bits[i], 1'b0, o);
  endtask

  task automatic tap_reset();
    tms_seq(8'h1F, 5);          // five TMS=1
    tms_seq(8'h00, 1);          // Run-Test/Idle
  endtask

  // Scan n bits from Run-Test/Idle and back. If pause_at > 0 the scan pauses
  // after that many bits (Exit1, Pause x3, Exit2) and resumes.
  task automatic scan(input logic ir, input int n, input logic [1023:0] din,
                      output logic [1023:0] dout, input int pause_at = 0);
    logic o;
    logic seen_en = 1'b1;
    dout = '0;
    tms_seq(ir ? 8'b0011 : 8'b001, ir ? 4 : 3);   // Select-DR [Select-IR] Capture Shift
    for (int i = 0; i < n; i++) begin
      if (pause_at > 0 && i == pause_at) begin
        tms_seq(8'b01000, 5);   // Pause (stay x2) Exit2, Shift
      end
      seen_en &= tdo_en;
      clk_tms(i == n - 1 || (pause_at > 0 && i == pause_at - 1), din[i], o);
      dout[i] = o;
    end
    chk(seen_en, 1'b1, "tdo_en while shifting");
    tms_seq(8'b01, 2);          // Update, Run-Test/Idle
    chk(tdo_en, 1'b0, "tdo_en in Run-Test/Idle");
  endtask

  task automatic load_ir(input instr_t code);
    logic [1023:0] o;
    scan(1'b1, IR_WIDTH, 1024'(code), o);
    chk(o[IR_WIDTH-1:0], 64'b0001, "IR capture pattern");
    mech[M_IR_CAPTURE]++;
  endtask

  // s27 reference equations, for INTEST
  function automatic logic [3:0] s27_ref(input logic [3:0] g, input logic [2:0] st);
    // returns {G17, next state}
    logic g0 = g[0], g1 = g[1], g2 = g[2], g3 = g[3];
    logic g5 = st[0], g6 = st[1], g7 = st[2];
    logic n_g0 = !g0;
    logic a = n_g0 && g6;
    logic b = !(g1 || g7);
    logic c = !((g3 || a) && (b || a));
    logic q11 = !(g5 || c);
    logic q10 = !(n_g0 || q11);
    logic q13 = !(g2 || b);
    return {!q11, q13, q11, q10};
  endfunction

  initial begin
    logic [1023:0] din, dout;
    logic [N-1:0] pre;
    logic [3:0] r;
    logic [2:0] st;
    int t0;

    #1 trst_n = 1'b0;
    sys_rst = 1'b1;
    #1 sys_clk = 1'b1;
    #1 sys_clk = 1'b0;
    sys_rst = 1'b0;
    #2 trst_n = 1'b1;
    mech[M_TRST]++;
    tms_seq(8'h00, 1);

    // IDCODE is the instruction after reset; a 32-bit scan reads it, and the
    // word occupies exactly 32 shift cycles (bits 32.. are what went in).
    din = {$urandom, $urandom};
    t0 = cycles;
    scan(1'b0, 64, din, dout);
    chk(dout[31:0], ID, "IDCODE after reset");
    chk(dout[63:32], din[31:0], "TDI after 32 IDCODE bits");
    chk(cycles - t0, 64 + 3 + 2, "DR scan length in TCK cycles");
    mech[M_IDCODE_RESET]++;

    // BYPASS: one bit of delay, captured 0
    load_ir(BYPASS);
    din = {$urandom, $urandom};
    scan(1'b0, 40, din, dout);
    chk(dout[0], 0, "bypass capture");
    chk(dout[39:1], din[38:0], "bypass one-bit delay");
    mech[M_BYPASS]++;

    // unused opcode behaves as BYPASS
    load_ir(4'b0111);
    din = {$urandom, $urandom};
    scan(1'b0, 20, din, dout);
    chk(dout[19:1], din[18:0], "unused opcode selects bypass");
    mech[M_UNUSED]++;

    // SAMPLE/PRELOAD: observe pads and core outputs, preload a vector
    load_ir(SAMPLE_PRELOAD);
    repeat (5) begin
      pin_in = NI'($urandom);
      out1   = 1'($urandom);
      pre    = N'({$urandom, $urandom});
      #1;
      chk(core_in, pin_in, "SAMPLE leaves core inputs transparent");
      scan(1'b0, N, 1024'(pre), dout);
      chk(dout[N-1:0], {out1, g17, pin_in}, "SAMPLE captured pins and core outputs");
      chk(pin_out, {out1, g17}, "SAMPLE leaves pads transparent");
      mech[M_SAMPLE]++;
    end
    mech[M_PRELOAD]++;

    // EXTEST: preloaded output cells drive the pads once EXTEST is in
    load_ir(EXTEST);
    chk(pin_out, pre[N-1:NI], "EXTEST drives preloaded value");
    repeat (5) begin
      pin_in = NI'($urandom);
      pre    = N'({$urandom, $urandom});
      scan(1'b0, N, 1024'(pre), dout);
      chk(dout[NI-1:0], pin_in, "EXTEST captures input pads");
      chk(pin_out, pre[N-1:NI], "EXTEST drives output pads");
      chk(core_in, pin_in, "EXTEST keeps core inputs on the pads");
      mech[M_EXTEST]++;
    end

    // INTEST: apply s27 inputs from the boundary register, clock the core,
    // capture G17 through the output cell
    load_ir(INTEST);
    st = s27_state;
    repeat (16) begin
      pre = N'({$urandom, $urandom});
      scan(1'b0, N, 1024'(pre), dout);
      chk(core_in, pre[NI-1:0], "INTEST drives core inputs");
      chk(pin_out, pre[N-1:NI], "INTEST drives output pads from cells");
      r = s27_ref(pre[3:0], st);
      #1 chk(g17, r[3], "s27 output under INTEST");
      // capture the core's response in the next scan (same inputs)
      scan(1'b0, N, 1024'(pre), dout);
      chk(dout[NI], r[3], "INTEST captures G17");
      sys_clk = 1'b1; #1 sys_clk = 1'b0;
      st = r[2:0];
      chk(s27_state, st, "s27 next state");
      mech[M_INTEST]++;
    end

    // PRIVATE-0: read the s27 flip-flops, write a new value
    load_ir(PRIVATE_BASE);
    repeat (5) begin
      din = 1024'($urandom);
      t0 = load_pulses;
      scan(1'b0, PW, din, dout);
      chk(dout[PW-1:0], PW'(s27_state), "PRIVATE reads core register");
      chk(priv_out[0], din[PW-1:0], "PRIVATE writes priv_out");
      chk(load_pulses - t0, 1, "one priv_load pulse per update");
      mech[M_PRIV_READ]++;
      mech[M_PRIV_WRITE]++;
      sys_clk = 1'b1; #1 sys_clk = 1'b0;
    end

    // CLAMP: pads held from the update stage, bypass selected
    load_ir(SAMPLE_PRELOAD);
    pre = N'({$urandom, $urandom});
    scan(1'b0, N, 1024'(pre), dout);
    load_ir(CLAMP);
    chk(pin_out, pre[N-1:NI], "CLAMP drives pads");
    din = 1024'($urandom);
    scan(1'b0, 10, din, dout);
    chk(dout[9:1], din[8:0], "CLAMP selects bypass");
    chk(pin_out, pre[N-1:NI], "CLAMP value kept after DR scan");
    mech[M_CLAMP]++;

    // HIGHZ: output pads disabled, bypass selected
    chk(pin_oe, 1, "pads enabled before HIGHZ");
    load_ir(HIGHZ);
    chk(pin_oe, 0, "HIGHZ disables pads");
    scan(1'b0, 10, din, dout);
    chk(dout[9:1], din[8:0], "HIGHZ selects bypass");
    mech[M_HIGHZ]++;

    // USERCODE
    load_ir(USERCODE);
    scan(1'b0, 32, '0, dout);
    chk(dout[31:0], 32'h0, "USERCODE");
    mech[M_USERCODE]++;

    // scans interrupted by Pause-DR and Pause-IR
    begin
      logic [1023:0] o;
      scan(1'b1, IR_WIDTH, 1024'(SAMPLE_PRELOAD), o, 2);
      chk(o[3:0], 4'b0001, "IR capture across Pause-IR");
      mech[M_PAUSE_IR]++;
    end
    pin_in = NI'($urandom);
    pre    = N'({$urandom, $urandom});
    scan(1'b0, N, 1024'(pre), dout, 5);
    chk(dout[N-1:0], {out1, g17, pin_in}, "SAMPLE across Pause-DR");
    scan(1'b0, N, 1024'(pre), dout);
    chk(dout[N-1:0], {out1, g17, pin_in}, "SAMPLE after paused scan");
    load_ir(EXTEST);
    chk(pin_out, pre[N-1:NI], "preload across Pause-DR");
    mech[M_PAUSE_DR]++;

    // five TMS=1 edges: back to IDCODE, pads transparent
    load_ir(HIGHZ);
    tap_reset();
    chk(pin_oe, 1, "pads enabled after TMS reset");
    chk(pin_out, {out1, g17}, "pads transparent after TMS reset");
    scan(1'b0, 32, '0, dout);
    chk(dout[31:0], ID, "IDCODE after TMS reset");
    mech[M_TMS_RESET]++;

    // TRST_N in the middle of a scan
    load_ir(EXTEST);
    tms_seq(8'b001, 3);
    #2 trst_n = 1'b0;
    #2 trst_n = 1'b1;
    chk(pin_out, {out1, g17}, "pads transparent after TRST_N");
    tms_seq(8'h00, 1);
    scan(1'b0, 32, '0, dout);
    chk(dout[31:0], ID, "IDCODE after TRST_N");
    mech[M_TRST]++;

    for (int m = 0; m < M_NUM; m++) begin
      automatic mech_t mm = mech_t'(m);
      $display("mechanism %-16s %0d", mm.name(), mech[m]);
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL: mechanism %s never happened", mm.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
