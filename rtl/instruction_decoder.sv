// instruction_decoder: turns the current instruction into register selects.
//
// Purely combinational. It chooses which data register sits between TDI and
// TDO and sets the boundary-scan cell modes and the output-pad enable:
//   EXTEST          boundary register; output cells drive the pads
//   SAMPLE/PRELOAD  boundary register; cells transparent
//   INTEST          boundary register; input cells drive the core, output
//                   cells drive the pads from their update stage
//   IDCODE/USERCODE 32-bit identification registers
//   CLAMP           bypass register; output cells drive the pads
//   HIGHZ           bypass register; output pads disabled
//   PRIVATE-x       private data register x (x < NUM_PRIVATE)
//   BYPASS and every unused code select the bypass register.
// The instruction set is the one the standard lists; the opcode values and
// the PRIVATE-x numbering are this design's choice (see jtag_pkg).
module instruction_decoder
  import jtag_pkg::*;
#(
  parameter int NUM_PRIVATE = 1
) (
  input  instr_t  instr,
  output decode_t dec
);

  always_comb begin
    dec          = '0;
    dec.dr       = DR_BYPASS;
    dec.oe       = 1'b1;
    unique case (instr)
      EXTEST:         begin dec.dr = DR_BOUNDARY; dec.mode_out = 1'b1; end
      SAMPLE_PRELOAD: dec.dr = DR_BOUNDARY;
      INTEST:         begin dec.dr = DR_BOUNDARY; dec.mode_in = 1'b1; dec.mode_out = 1'b1; end
      IDCODE:         dec.dr = DR_IDCODE;
      USERCODE:       dec.dr = DR_USERCODE;
      CLAMP:          dec.mode_out = 1'b1;
      HIGHZ:          dec.oe = 1'b0;
      default: begin
        if (instr >= PRIVATE_BASE && int'(instr) - int'(PRIVATE_BASE) < NUM_PRIVATE) begin
          dec.dr       = DR_PRIVATE;
          dec.priv_idx = 3'(instr - PRIVATE_BASE);
        end
      end
    endcase
  end

endmodule
