// tb_iscas89_sizes: the controller sized for each of the 27 ISCAS'89 circuits.
//
// One controller per circuit, with N_IN / N_OUT set to the circuit's primary
// input and output counts (with pads, as tabulated for the benchmark set); all
// share TCK, TMS, TDI and TRST_N, and each TDO is checked on its own. The run
// reads every IDCODE, checks BYPASS (one-bit delay), SAMPLE of random pads and
// core outputs over each chain's own length, and PRELOAD + EXTEST of a random
// stream, which leaves in each chain the last N_IN+N_OUT bits shifted in.
module tb_iscas89_sizes;
  import jtag_pkg::*;

  localparam int ND = 27;
  localparam int PI [ND] = '{11, 10, 16, 16, 10, 14, 25, 10, 26, 10, 42, 42, 25, 25, 41, 23,
                             21, 21, 24, 15, 42, 43, 70, 84, 35, 42, 45};
  localparam int PO [ND] = '{2, 7, 12, 12, 7, 8, 2, 7, 8, 7, 25, 24, 20, 20, 2, 24,
                             15, 15, 5, 20, 50, 40, 153, 151, 107, 321, 306};
  localparam int L = 1024;
  localparam logic [31:0] ID = 32'h1000_0001;

  logic tck = 1'b0, trst_n = 1'b1, tms = 1'b1, tdi = 1'b0;
  logic tdo [ND], tdo_en [ND], pin_oe [ND], priv_load [ND];
  logic [511:0] pin_in [ND], core_in [ND], core_out [ND], pin_out [ND];
  logic [L-1:0] dout [ND];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < ND; k++) begin : g_dut
    logic [0:0][7:0] priv_out;
    logic [0:0] load;
    jtag_controller #(.N_IN(PI[k]), .N_OUT(PO[k])) dut (
      .tck, .trst_n, .tms, .tdi, .tdo(tdo[k]), .tdo_en(tdo_en[k]),
      .pin_in(pin_in[k][PI[k]-1:0]), .core_in(core_in[k][PI[k]-1:0]),
      .core_out(core_out[k][PO[k]-1:0]), .pin_out(pin_out[k][PO[k]-1:0]),
      .pin_oe(pin_oe[k]), .priv_in('0), .priv_out(priv_out), .priv_load(load));
    assign priv_load[k] = load[0];
  end

  task automatic chk(input logic [511:0] got, input logic [511:0] exp, input string what,
                     input int k);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s, circuit %0d (%0d in, %0d out)", what, k, PI[k], PO[k]);
    end
  endtask

  task automatic clk_tms(input logic m, input logic d, input int idx);
    tms = m; tdi = d;
    #4;
    if (idx >= 0) for (int k = 0; k < ND; k++) dout[k][idx] = tdo[k];
    tck = 1'b1;
    #5 tck = 1'b0;
    #1;
  endtask

  task automatic scan(input logic ir, input int n, input logic [L-1:0] din);
    if (ir) clk_tms(1, 0, -1);
    clk_tms(1, 0, -1); clk_tms(0, 0, -1); clk_tms(0, 0, -1);
    for (int i = 0; i < n; i++) clk_tms(i == n - 1, din[i], i);
    clk_tms(1, 0, -1); clk_tms(0, 0, -1);
  endtask

  initial begin
    logic [L-1:0] d;
    int n;
    for (int k = 0; k < ND; k++) begin
      pin_in[k]   = {16{$urandom}};
      core_out[k] = {16{$urandom}};
    end
    #1 trst_n = 1'b0;
    #2 trst_n = 1'b1;
    clk_tms(0, 0, -1);

    scan(0, 32, '0);
    for (int k = 0; k < ND; k++) chk(512'(dout[k][31:0]), 512'(ID), "IDCODE", k);

    scan(1, IR_WIDTH, L'(BYPASS));
    for (int k = 0; k < ND; k++) chk(512'(dout[k][3:0]), 512'(4'b0001), "IR capture", k);
    d = {32{$urandom}};
    scan(0, 64, d);
    for (int k = 0; k < ND; k++) chk(512'(dout[k][63:1]), 512'(d[62:0]), "BYPASS", k);

    scan(1, IR_WIDTH, L'(SAMPLE_PRELOAD));
    for (int i = 0; i < L / 32; i++) d[i*32 +: 32] = $urandom;
    n = 0;
    for (int k = 0; k < ND; k++) if (PI[k] + PO[k] > n) n = PI[k] + PO[k];
    scan(0, n, d);
    for (int k = 0; k < ND; k++) begin
      automatic logic [511:0] cap = '0;
      for (int i = 0; i < PI[k]; i++) cap[i] = pin_in[k][i];
      for (int i = 0; i < PO[k]; i++) cap[PI[k] + i] = core_out[k][i];
      chk(512'(dout[k][511:0]) & ((512'(1) << (PI[k] + PO[k])) - 1), cap, "SAMPLE", k);
    end

    scan(1, IR_WIDTH, L'(EXTEST));
    for (int k = 0; k < ND; k++) begin
      automatic logic [511:0] exp = '0;
      for (int i = 0; i < PO[k]; i++) exp[i] = d[n - PO[k] + i];
      chk(pin_out[k] & ((512'(1) << PO[k]) - 1), exp, "EXTEST drives preloaded outputs", k);
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
