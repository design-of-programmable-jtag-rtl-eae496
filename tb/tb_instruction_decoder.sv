// tb_instruction_decoder: checks all 16 opcodes for one and for three PRIVATE-x
// registers against an expectation table written from the instruction list.
module tb_instruction_decoder;
  import jtag_pkg::*;

  instr_t  instr;
  decode_t dec1, dec3;
  int checks = 0, failures = 0;

  instruction_decoder #(.NUM_PRIVATE(1)) dut1 (.instr, .dec(dec1));
  instruction_decoder #(.NUM_PRIVATE(3)) dut3 (.instr, .dec(dec3));

  function automatic decode_t expect_dec(input int code, input int nprv);
    decode_t e = '0;
    e.dr = DR_BYPASS; e.oe = 1'b1;
    case (code)
      0:  begin e.dr = DR_BOUNDARY; e.mode_out = 1; end  // EXTEST
      1:  e.dr = DR_BOUNDARY;                             // SAMPLE/PRELOAD
      2:  e.dr = DR_IDCODE;
      3:  e.dr = DR_USERCODE;
      4:  begin e.dr = DR_BOUNDARY; e.mode_in = 1; e.mode_out = 1; end  // INTEST
      5:  e.mode_out = 1;                                 // CLAMP
      6:  e.oe = 0;                                       // HIGHZ
      default:
        if (code >= 8 && code < 8 + nprv) begin
          e.dr = DR_PRIVATE; e.priv_idx = 3'(code - 8);
        end
    endcase
    return e;
  endfunction

  task automatic chk(input decode_t got, input decode_t exp, input int code, input int n);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: code %0d (NUM_PRIVATE=%0d) decode %b expected %b", code, n, got, exp);
    end
  endtask

  initial begin
    for (int c = 0; c < 16; c++) begin
      instr = instr_t'(c);
      #1;
      chk(dec1, expect_dec(c, 1), c, 1);
      chk(dec3, expect_dec(c, 3), c, 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
