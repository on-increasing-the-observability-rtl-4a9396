// jam_pkg: types and constants shared by the JAM pipeline.
//
// JAM is a 32-bit, five-stage (IF, ID, EX, MEM, WB) RISC processor. Every
// instruction is 32 bits wide and comes in one of two layouts:
//   register format : opcode[31:26] rd[25:21] rs1[20:16] rs2[15:11] zero[10:0]
//   immediate format: opcode[31:26] rd[25:21] rs1[20:16] imm[15:0]
// The low two opcode bits choose how the 16-bit immediate is widened
// (IMM_NONE = second operand from a register, IMM_SEXT, IMM_EXT = imm in the
// upper half, IMM_DISP = imm * 4 sign extended). The field layout, the four
// immediate formats, the 22 instruction types and the count of 47 opcodes
// follow the published JAM description; the numeric opcode assignment below is
// this design's own, since no opcode table is published.
//
// The package also fixes the 24 control signals produced by the control unit
// (ctrl_t) and the 87-bit bundle of monitored signals (obs_t) fed to the XOR
// observation tree. 50 signals / 87 bits is the published count; which signal
// fills which bit is this design's own choice, reusing the published signal
// names wherever this pipeline has an equivalent.
package jam_pkg;

  localparam int unsigned XLEN = 32;
  localparam int unsigned NREGS = 32;
  localparam int unsigned OBS_BITS = 87;

  // Immediate formats, equal to opcode[1:0].
  typedef enum logic [1:0] {
    IMM_NONE = 2'b00,
    IMM_SEXT = 2'b01,
    IMM_EXT  = 2'b10,
    IMM_DISP = 2'b11
  } imm_mode_e;

  // Opcode groups, opcode[5:2]. Each group holds up to four opcodes that
  // differ in the immediate format; some groups share their spare slots with
  // single-format instructions (see control_unit).
  localparam logic [3:0] G_ADD   = 4'd0;   // ADD  R I X D
  localparam logic [3:0] G_ADDV  = 4'd1;   // ADDV R I X, JUMP D
  localparam logic [3:0] G_SUB   = 4'd2;   // SUB  R I X, BEQ D
  localparam logic [3:0] G_SUBV  = 4'd3;   // SUBV R I X, BNE D
  localparam logic [3:0] G_MULLO = 4'd4;   // MULLO R I, GET, LW D
  localparam logic [3:0] G_MULHI = 4'd5;   // MULHI R I, PUT, SW D
  localparam logic [3:0] G_AND   = 4'd6;   // AND  R I X, TRAP
  localparam logic [3:0] G_OR    = 4'd7;   // OR   R I X
  localparam logic [3:0] G_XOR   = 4'd8;   // XOR  R I X
  localparam logic [3:0] G_SHS   = 4'd9;   // SHS  R I
  localparam logic [3:0] G_SHZ   = 4'd10;  // SHZ  R I
  localparam logic [3:0] G_CMP   = 4'd11;  // CMP  R I X
  localparam logic [3:0] G_LW    = 4'd12;  // LW   I
  localparam logic [3:0] G_SW    = 4'd13;  // SW   I
  localparam logic [3:0] G_SET   = 4'd14;  // SET  R I
  localparam logic [3:0] G_RESET = 4'd15;  // RESET R I

  // Named opcodes used by testbenches and programs.
  localparam logic [5:0] OP_ADD    = {G_ADD, 2'b00};
  localparam logic [5:0] OP_ADDI   = {G_ADD, 2'b01};
  localparam logic [5:0] OP_ADDX   = {G_ADD, 2'b10};
  localparam logic [5:0] OP_ADDD   = {G_ADD, 2'b11};
  localparam logic [5:0] OP_ADDV   = {G_ADDV, 2'b00};
  localparam logic [5:0] OP_ADDVI  = {G_ADDV, 2'b01};
  localparam logic [5:0] OP_JUMP   = {G_ADDV, 2'b11};
  localparam logic [5:0] OP_SUB    = {G_SUB, 2'b00};
  localparam logic [5:0] OP_SUBI   = {G_SUB, 2'b01};
  localparam logic [5:0] OP_BEQ    = {G_SUB, 2'b11};
  localparam logic [5:0] OP_SUBV   = {G_SUBV, 2'b00};
  localparam logic [5:0] OP_BNE    = {G_SUBV, 2'b11};
  localparam logic [5:0] OP_MULLO  = {G_MULLO, 2'b00};
  localparam logic [5:0] OP_MULLOI = {G_MULLO, 2'b01};
  localparam logic [5:0] OP_GET    = {G_MULLO, 2'b10};
  localparam logic [5:0] OP_LWD    = {G_MULLO, 2'b11};
  localparam logic [5:0] OP_MULHI  = {G_MULHI, 2'b00};
  localparam logic [5:0] OP_MULHII = {G_MULHI, 2'b01};
  localparam logic [5:0] OP_PUT    = {G_MULHI, 2'b10};
  localparam logic [5:0] OP_SWD    = {G_MULHI, 2'b11};
  localparam logic [5:0] OP_AND    = {G_AND, 2'b00};
  localparam logic [5:0] OP_ANDI   = {G_AND, 2'b01};
  localparam logic [5:0] OP_TRAP   = {G_AND, 2'b11};
  localparam logic [5:0] OP_OR     = {G_OR, 2'b00};
  localparam logic [5:0] OP_ORI    = {G_OR, 2'b01};
  localparam logic [5:0] OP_ORX    = {G_OR, 2'b10};
  localparam logic [5:0] OP_XOR    = {G_XOR, 2'b00};
  localparam logic [5:0] OP_XORI   = {G_XOR, 2'b01};
  localparam logic [5:0] OP_SHS    = {G_SHS, 2'b00};
  localparam logic [5:0] OP_SHSI   = {G_SHS, 2'b01};
  localparam logic [5:0] OP_SHZ    = {G_SHZ, 2'b00};
  localparam logic [5:0] OP_SHZI   = {G_SHZ, 2'b01};
  localparam logic [5:0] OP_CMP    = {G_CMP, 2'b00};
  localparam logic [5:0] OP_CMPI   = {G_CMP, 2'b01};
  localparam logic [5:0] OP_LW     = {G_LW, 2'b01};
  localparam logic [5:0] OP_SW     = {G_SW, 2'b01};
  localparam logic [5:0] OP_SET    = {G_SET, 2'b00};
  localparam logic [5:0] OP_SETI   = {G_SET, 2'b01};
  localparam logic [5:0] OP_RESET  = {G_RESET, 2'b00};
  localparam logic [5:0] OP_RESETI = {G_RESET, 2'b01};

  // ALU operations.
  typedef enum logic [2:0] {
    ALU_ADD  = 3'd0,
    ALU_SUB  = 3'd1,
    ALU_AND  = 3'd2,
    ALU_OR   = 3'd3,
    ALU_XOR  = 3'd4,
    ALU_SHS  = 3'd5,   // shift, sign fill on right shifts
    ALU_SHZ  = 3'd6,   // shift, zero fill
    ALU_PASS = 3'd7    // y = b
  } alu_op_e;

  // EX result select.
  typedef enum logic [1:0] {
    RES_ALU  = 2'd0,
    RES_MUL  = 2'd1,
    RES_PSW  = 2'd2,
    RES_LINK = 2'd3
  } res_sel_e;

  // PSW update kinds (active when cex_psw_enable).
  typedef enum logic [1:0] {
    PSW_FLAGS = 2'd0,  // load {N,Z,C,V} from the ALU
    PSW_PUT   = 2'd1,  // PSW <= operand A
    PSW_SET   = 2'd2,  // PSW <= PSW | operand 2
    PSW_RESET = 2'd3   // PSW <= PSW & ~operand 2
  } psw_op_e;

  // The 24 control signals of the control unit.
  typedef struct packed {
    logic      cid_cmp;         // 1: branch compare in ID
    logic      cid_beq;         // 2: branch on equal (else on not equal)
    logic      cid_bsel;        // 3: read port B addresses rd (else rs2)
    logic      cid_use_a;       // 4: instruction reads port A
    logic      cid_use_b;       // 5: instruction reads port B
    logic      cex_bsel;        // 6: second operand is the immediate
    alu_op_e   cex_aluop;       // 7
    res_sel_e  cex_regsel;      // 8
    logic      cex_mult;        // 9: multiply (multi-cycle)
    logic      cex_multop;      // 10: keep the high word of the product
    logic      cex_psw_enable;  // 11
    psw_op_e   cex_pswop;       // 12
    logic      cex_valid_res;   // 13: result exists at the end of EX
    logic      cex_valid_reg;   // 14: EX consumes register operands
    logic      cm_read;         // 15
    logic      cm_write;        // 16
    logic      cm_jump;         // 17: jump taken in MEM
    logic      cm_trap;         // 18: trap opcode (decoded, no action)
    logic      cm_valid_mem;    // 19: MEM accesses data memory
    logic      cm_valid_reg;    // 20: result exists only at the end of MEM
    logic      cwb_enable;      // 21: write rd in WB
    logic      cwb_sel;         // 22: WB value from memory (else EX result)
    imm_mode_e c_immmode;       // 23
    logic      c_illegal;       // 24: opcode not assigned
  } ctrl_t;

  // The 87 monitored bits: 50 signals.
  typedef struct packed {
    ctrl_t       idex_in;          // 24 signals, 29 bits
    logic [4:0]  id_ra;            // port A address in ID
    logic [4:0]  id_rb;            // port B address in ID
    logic [4:0]  id_rd;            // destination field in ID
    logic [4:0]  ex_wb_dest_buf;   // destination held in ID/EX
    logic        ex_wb_valid_buf;  // ID/EX valid
    logic [4:0]  exmem_dest;       // destination held in EX/MEM
    logic        exmem_cm_write;
    logic        exmem_cm_read;
    logic        exmem_cwb_enable;
    logic [4:0]  wb_rw;            // register written in WB
    logic        wb_we;            // register write enable in WB
    logic        mem_jump_trap;    // jump redirect from MEM
    logic        if_zero;          // IF/ID bubble inserted by a taken branch
    logic        ex_mc_finished;   // multiply finishing this cycle
    logic [1:0]  ex_state;         // integer unit state
    logic        stall_lw;
    logic        stall_branch;
    logic        stall_mul;
    logic        stall_store;
    logic        mem_sw_phase;     // second (write) cycle of a store
    logic [1:0]  fwd_ex_a;
    logic [1:0]  fwd_ex_b;
    logic [1:0]  fwd_id_a;
    logic [1:0]  fwd_id_b;
    logic        branch_taken;
    logic [3:0]  psw_flags;        // N Z C V
  } obs_t;

  // Forwarding source select.
  typedef enum logic [1:0] {
    FWD_NONE  = 2'd0,  // register file / pipeline register value
    FWD_EXMEM = 2'd1,  // EX/MEM result
    FWD_MEMWB = 2'd2   // MEM/WB write-back value
  } fwd_sel_e;

  // Integer unit states.
  typedef enum logic [1:0] {
    IU_IDLE = 2'd0,
    IU_MUL  = 2'd1
  } iu_state_e;

  // Instruction word helpers.
  function automatic logic [31:0] enc_r(logic [5:0] op, logic [4:0] rd,
                                        logic [4:0] rs1, logic [4:0] rs2);
    return {op, rd, rs1, rs2, 11'd0};
  endfunction

  function automatic logic [31:0] enc_i(logic [5:0] op, logic [4:0] rd,
                                        logic [4:0] rs1, logic [15:0] imm);
    return {op, rd, rs1, imm};
  endfunction

endpackage
