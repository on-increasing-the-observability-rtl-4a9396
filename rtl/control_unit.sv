// control_unit: the JAM decoder, in the ID stage.
//
// Maps the 6-bit opcode to the 24 control signals of ctrl_t. opcode[5:2]
// names an instruction group and opcode[1:0] the immediate format, so the
// format bits go straight to the immediate extension unit. 47 of the 64
// opcodes are assigned (22 instruction types); the rest decode as a NOP with
// c_illegal set. The group/format layout follows the published ISA (22
// types, up to four formats each, 47 opcodes); the numeric assignment and
// the exact semantics below are this design's own:
//   ADD/SUB/AND/OR/XOR/SHS/SHZ  rd = rs1 op op2
//   ADDV/SUBV                   as ADD/SUB, and PSW flags updated
//   MULLO/MULHI                 rd = low/high word of signed rs1*op2 (33 cycles)
//   CMP                         PSW flags from rs1 - op2, no register write
//   SET/RESET                   PSW |= op2 / PSW &= ~op2
//   GET/PUT                     rd = PSW / PSW = rs1
//   LW/SW                       rd = M[rs1+op2] / M[rs1+op2] = rd
//   BEQ/BNE                     if (rd ==/!= rs1) PC = PC+4+disp (in ID)
//   JUMP                        rd = PC+4, PC = rs1+disp (taken in MEM)
//   TRAP                        decoded only; traps are not implemented
// Purely combinational.
module control_unit
  import jam_pkg::*;
(
  input  logic [5:0] opcode,
  output ctrl_t      ctrl
);
  logic [3:0] grp;
  logic [1:0] fmt;

  assign grp = opcode[5:2];
  assign fmt = opcode[1:0];

  // an ordinary register-writing ALU instruction
  function automatic ctrl_t alu_rr(alu_op_e op, logic [1:0] f);
    ctrl_t c;
    c = '0;
    c.cid_use_a     = 1'b1;
    c.cid_use_b     = (f == 2'b00);
    c.cex_bsel      = (f != 2'b00);
    c.cex_aluop     = op;
    c.cex_regsel    = RES_ALU;
    c.cex_valid_res = 1'b1;
    c.cex_valid_reg = 1'b1;
    c.cwb_enable    = 1'b1;
    c.c_immmode     = imm_mode_e'(f);
    return c;
  endfunction

  always_comb begin
    ctrl = '0;
    ctrl.c_immmode = imm_mode_e'(fmt);
    ctrl.c_illegal = 1'b1;
    unique case (grp)
      G_ADD: ctrl = alu_rr(ALU_ADD, fmt);
      G_ADDV, G_SUB, G_SUBV: begin
        if (fmt != 2'b11) begin
          ctrl = alu_rr((grp == G_ADDV) ? ALU_ADD : ALU_SUB, fmt);
          ctrl.cex_psw_enable = (grp != G_SUB);
          ctrl.cex_pswop      = PSW_FLAGS;
        end else if (grp == G_ADDV) begin       // JUMP
          ctrl = alu_rr(ALU_ADD, fmt);
          ctrl.cex_regsel = RES_LINK;
          ctrl.cm_jump    = 1'b1;
        end else begin                          // BEQ / BNE
          ctrl.c_illegal = 1'b0;
          ctrl.cid_cmp   = 1'b1;
          ctrl.cid_beq   = (grp == G_SUB);
          ctrl.cid_bsel  = 1'b1;
          ctrl.cid_use_a = 1'b1;
          ctrl.cid_use_b = 1'b1;
        end
      end
      G_MULLO, G_MULHI: begin
        if (fmt[1] == 1'b0) begin
          ctrl = alu_rr(ALU_PASS, fmt);
          ctrl.cex_regsel = RES_MUL;
          ctrl.cex_mult   = 1'b1;
          ctrl.cex_multop = (grp == G_MULHI);
        end else if (fmt == 2'b10 && grp == G_MULLO) begin   // GET
          ctrl.c_illegal     = 1'b0;
          ctrl.cex_regsel    = RES_PSW;
          ctrl.cex_valid_res = 1'b1;
          ctrl.cwb_enable    = 1'b1;
        end else if (fmt == 2'b10) begin                     // PUT
          ctrl.c_illegal      = 1'b0;
          ctrl.cid_use_a      = 1'b1;
          ctrl.cex_valid_reg  = 1'b1;
          ctrl.cex_psw_enable = 1'b1;
          ctrl.cex_pswop      = PSW_PUT;
        end else if (grp == G_MULLO) begin                   // LW, displaced
          ctrl = alu_rr(ALU_ADD, fmt);
          ctrl.cex_valid_res = 1'b0;
          ctrl.cm_read       = 1'b1;
          ctrl.cm_valid_mem  = 1'b1;
          ctrl.cm_valid_reg  = 1'b1;
          ctrl.cwb_sel       = 1'b1;
        end else begin                                       // SW, displaced
          ctrl = alu_rr(ALU_ADD, fmt);
          ctrl.cex_valid_res = 1'b0;
          ctrl.cwb_enable    = 1'b0;
          ctrl.cid_bsel      = 1'b1;
          ctrl.cid_use_b     = 1'b1;
          ctrl.cm_write      = 1'b1;
          ctrl.cm_valid_mem  = 1'b1;
        end
      end
      G_AND: begin
        if (fmt != 2'b11) ctrl = alu_rr(ALU_AND, fmt);
        else begin                                           // TRAP
          ctrl.c_illegal = 1'b0;
          ctrl.cm_trap   = 1'b1;
        end
      end
      G_OR:  if (fmt != 2'b11) ctrl = alu_rr(ALU_OR, fmt);
      G_XOR: if (fmt != 2'b11) ctrl = alu_rr(ALU_XOR, fmt);
      G_SHS: if (fmt[1] == 1'b0) ctrl = alu_rr(ALU_SHS, fmt);
      G_SHZ: if (fmt[1] == 1'b0) ctrl = alu_rr(ALU_SHZ, fmt);
      G_CMP: if (fmt != 2'b11) begin
        ctrl = alu_rr(ALU_SUB, fmt);
        ctrl.cex_valid_res  = 1'b0;
        ctrl.cwb_enable     = 1'b0;
        ctrl.cex_psw_enable = 1'b1;
        ctrl.cex_pswop      = PSW_FLAGS;
      end
      G_LW: if (fmt == 2'b01) begin
        ctrl = alu_rr(ALU_ADD, fmt);
        ctrl.cex_valid_res = 1'b0;
        ctrl.cm_read       = 1'b1;
        ctrl.cm_valid_mem  = 1'b1;
        ctrl.cm_valid_reg  = 1'b1;
        ctrl.cwb_sel       = 1'b1;
      end
      G_SW: if (fmt == 2'b01) begin
        ctrl = alu_rr(ALU_ADD, fmt);
        ctrl.cex_valid_res = 1'b0;
        ctrl.cwb_enable    = 1'b0;
        ctrl.cid_bsel      = 1'b1;
        ctrl.cid_use_b     = 1'b1;
        ctrl.cm_write      = 1'b1;
        ctrl.cm_valid_mem  = 1'b1;
      end
      default: begin                                         // SET / RESET
        if (fmt[1] == 1'b0) begin
          ctrl = alu_rr(ALU_PASS, fmt);
          ctrl.cid_use_a      = 1'b0;
          ctrl.cex_valid_res  = 1'b0;
          ctrl.cwb_enable     = 1'b0;
          ctrl.cex_psw_enable = 1'b1;
          ctrl.cex_pswop      = (grp == G_SET) ? PSW_SET : PSW_RESET;
        end
      end
    endcase
  end
endmodule
