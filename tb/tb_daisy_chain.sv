// tb_daisy_chain: two controllers on one board chain, sharing TCK, TMS and
// TRST_N, with TDO of the first feeding TDI of the second.
//
// Device A is put in BYPASS, device B in SAMPLE/PRELOAD. The chain's data path
// must then be B's 13 boundary cells plus A's single bypass bit: the sampled
// pins of B leave the chain first and the stream shifted in appears after
// exactly 14 bits. Both IR scans go through one 8-bit IR scan (4 + 4 bits),
// and after reset the two IDCODEs read back to back as 64 bits.
module tb_daisy_chain;
  import jtag_pkg::*;

  localparam int NI = 11, NO = 2, N = NI + NO;
  localparam logic [31:0] ID_A = 32'h1000_0001, ID_B = 32'h2000_0003;

  logic tck = 1'b0, trst_n = 1'b1, tms = 1'b1, tdi = 1'b0;
  logic tdo_a, tdo_b, en_a, en_b, oe_a, oe_b;
  logic [NI-1:0] pin_a = '0, pin_b = '0, cin_a, cin_b;
  logic [NO-1:0] cout_a = '0, cout_b = '0, pout_a, pout_b;
  logic [0:0][7:0] po_a, po_b;
  logic [0:0] ld_a, ld_b;
  logic [1023:0] dout;
  int checks = 0, failures = 0;

  // device A is nearest the tester's TDI
  jtag_controller #(.IDCODE_VALUE(ID_A)) dev_a (
    .tck, .trst_n, .tms, .tdi, .tdo(tdo_a), .tdo_en(en_a),
    .pin_in(pin_a), .core_in(cin_a), .core_out(cout_a), .pin_out(pout_a), .pin_oe(oe_a),
    .priv_in('0), .priv_out(po_a), .priv_load(ld_a));
  jtag_controller #(.IDCODE_VALUE(ID_B)) dev_b (
    .tck, .trst_n, .tms, .tdi(tdo_a), .tdo(tdo_b), .tdo_en(en_b),
    .pin_in(pin_b), .core_in(cin_b), .core_out(cout_b), .pin_out(pout_b), .pin_oe(oe_b),
    .priv_in('0), .priv_out(po_b), .priv_load(ld_b));

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %h expected %h", what, got, exp);
    end
  endtask

  task automatic clk_tms(input logic m, input logic d, input int idx);
    tms = m; tdi = d;
    #4 if (idx >= 0) dout[idx] = tdo_b;
    tck = 1'b1;
    #5 tck = 1'b0;
    #1;
  endtask

  task automatic scan(input logic ir, input int n, input logic [1023:0] din);
    if (ir) clk_tms(1, 0, -1);
    clk_tms(1, 0, -1); clk_tms(0, 0, -1); clk_tms(0, 0, -1);
    for (int i = 0; i < n; i++) clk_tms(i == n - 1, din[i], i);
    clk_tms(1, 0, -1); clk_tms(0, 0, -1);
  endtask

  initial begin
    logic [63:0] d;
    #1 trst_n = 1'b0;
    #2 trst_n = 1'b1;
    clk_tms(0, 0, -1);

    scan(0, 64, '0);
    chk(dout[63:0], {ID_A, ID_B}, "two IDCODEs back to back");

    // IR bits: the first 4 bits in pass through A and end in B's IR; the last
    // 4 stay in A. B's capture pattern leaves TDO first.
    scan(1, 8, 1024'({BYPASS, SAMPLE_PRELOAD}));
    chk(dout[7:0], 8'b0001_0001, "both IR capture patterns");

    repeat (5) begin
      pin_b  = NI'($urandom);
      cout_b = NO'($urandom);
      d      = {$urandom, $urandom};
      scan(0, 64, 1024'(d));
      chk(dout[N-1:0], {cout_b, pin_b}, "B sampled through the chain");
      chk(dout[N], 1'b0, "A's bypass bit captured 0");
      chk(dout[63:N+1], d[62-N:0], "chain length is 13 + 1 bits");
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
