// imm_ext: immediate extension unit of the JAM decode stage.
//
// Widens the 16-bit immediate of an immediate-format instruction to 32 bits.
// The mode is the low two bits of the opcode, as in the JAM ISA:
//   IMM_SEXT : sign extended
//   IMM_EXT  : immediate in bits 31:16, bits 15:0 zero ("extended immediate")
//   IMM_DISP : immediate times four, sign extended ("displaced")
//   IMM_NONE : register format; the output is the sign-extended immediate as
//              well, but the second operand is then taken from the register
//              file (the choice of output for this mode is this design's own).
// Purely combinational, no clock.
module imm_ext
  import jam_pkg::*;
(
  input  logic [15:0] imm,
  input  imm_mode_e   mode,
  output logic [31:0] ext
);
  always_comb begin
    unique case (mode)
      IMM_EXT:  ext = {imm, 16'h0000};
      IMM_DISP: ext = {{14{imm[15]}}, imm, 2'b00};
      default:  ext = {{16{imm[15]}}, imm};
    endcase
  end
endmodule
