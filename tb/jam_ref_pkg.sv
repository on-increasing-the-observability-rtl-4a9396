// jam_ref_pkg: instruction-set reference model of JAM and program builders
// for the pipeline testbenches.
//
// The model executes one instruction at a time on its own register file,
// PSW and word-addressed memories, with no notion of pipeline or timing, so
// the pipeline's architectural state can be compared against it after a
// program ends. Programs end with HALT, a BEQ r0,r0 to itself. Memories are
// MEMW words and are indexed by word address modulo MEMW.
package jam_ref_pkg;
  import jam_pkg::*;

  localparam int unsigned MEMW = 4096;
  localparam logic [31:0] HALT = {OP_BEQ, 5'd0, 5'd0, 16'hFFFF};
  localparam int unsigned DATA_BASE = 32'h1000;   // byte address of data area

  logic [31:0] r_regs [32];
  logic [31:0] r_psw;
  logic [31:0] r_imem [MEMW];
  logic [31:0] r_dmem [MEMW];
  logic [31:0] r_pc;
  int unsigned r_retired;
  int unsigned r_muls, r_loads, r_stores, r_branches, r_taken, r_jumps;

  function automatic logic [31:0] sx16(logic [15:0] v);
    return {{16{v[15]}}, v};
  endfunction

  function automatic void ref_reset();
    foreach (r_regs[i]) r_regs[i] = '0;
    r_psw = '0;
    r_pc = '0;
    r_retired = 0;
    r_muls = 0; r_loads = 0; r_stores = 0; r_branches = 0; r_taken = 0; r_jumps = 0;
  endfunction

  function automatic void wr(logic [4:0] r, logic [31:0] v);
    if (r != 0) r_regs[r] = v;
  endfunction

  function automatic logic [3:0] flags_add(logic [31:0] a, logic [31:0] b, logic sub);
    logic [32:0] s;
    logic [31:0] bb;
    logic v;
    bb = sub ? ~b : b;
    s  = {1'b0, a} + {1'b0, bb} + (sub ? 33'd1 : 33'd0);
    v  = (a[31] == bb[31]) && (s[31] != a[31]);
    return {s[31], s[31:0] == 0, s[32], v};
  endfunction

  function automatic logic [31:0] shift(logic [31:0] a, logic [31:0] b, logic arith);
    int amt;
    logic signed [31:0] sa;
    sa  = a;
    amt = int'($signed(b[5:0]));
    if (amt >= 0) return a << amt;
    amt = -amt;
    if (arith) begin
      sa = sa >>> ((amt >= 32) ? 31 : amt);
      return sa;
    end
    return (amt >= 32) ? 32'h0 : (a >> amt);
  endfunction

  // Execute one instruction. Returns 0 when the instruction is HALT.
  function automatic bit ref_step();
    logic [31:0] ins, a, b, rdv, op2, nxt;
    logic [5:0]  op;
    logic [4:0]  rd, rs1, rs2;
    logic [15:0] imm;
    logic signed [63:0] prod;
    ins = r_imem[(r_pc >> 2) % MEMW];
    if (ins == HALT) return 0;
    op  = ins[31:26]; rd = ins[25:21]; rs1 = ins[20:16]; rs2 = ins[15:11]; imm = ins[15:0];
    a   = r_regs[rs1];
    b   = r_regs[rs2];
    rdv = r_regs[rd];
    case (op[1:0])
      2'b00: op2 = b;
      2'b01: op2 = sx16(imm);
      2'b10: op2 = {imm, 16'h0};
      default: op2 = sx16(imm) << 2;
    endcase
    nxt = r_pc + 4;
    case (op)
      OP_ADD, OP_ADDI, OP_ADDX, OP_ADDD: wr(rd, a + op2);
      OP_ADDV, OP_ADDVI, {G_ADDV, 2'b10}: begin
        wr(rd, a + op2); r_psw[3:0] = flags_add(a, op2, 1'b0);
      end
      OP_SUB, OP_SUBI, {G_SUB, 2'b10}: wr(rd, a - op2);
      OP_SUBV, {G_SUBV, 2'b01}, {G_SUBV, 2'b10}: begin
        wr(rd, a - op2); r_psw[3:0] = flags_add(a, op2, 1'b1);
      end
      OP_MULLO, OP_MULLOI, OP_MULHI, OP_MULHII: begin
        prod = $signed(a) * $signed(op2);
        wr(rd, (op[5:2] == G_MULHI) ? prod[63:32] : prod[31:0]);
        r_muls++;
      end
      OP_AND, OP_ANDI, {G_AND, 2'b10}: wr(rd, a & op2);
      OP_OR, OP_ORI, OP_ORX:           wr(rd, a | op2);
      OP_XOR, OP_XORI, {G_XOR, 2'b10}: wr(rd, a ^ op2);
      OP_SHS, OP_SHSI: wr(rd, shift(a, op2, 1'b1));
      OP_SHZ, OP_SHZI: wr(rd, shift(a, op2, 1'b0));
      OP_CMP, OP_CMPI, {G_CMP, 2'b10}: r_psw[3:0] = flags_add(a, op2, 1'b1);
      OP_SET, OP_SETI:     r_psw = r_psw | op2;
      OP_RESET, OP_RESETI: r_psw = r_psw & ~op2;
      OP_GET: wr(rd, r_psw);
      OP_PUT: r_psw = a;
      OP_LW, OP_LWD: begin
        wr(rd, r_dmem[((a + op2) >> 2) % MEMW]); r_loads++;
      end
      OP_SW, OP_SWD: begin
        r_dmem[((a + op2) >> 2) % MEMW] = rdv; r_stores++;
      end
      OP_BEQ, OP_BNE: begin
        r_branches++;
        if ((rdv == a) == (op == OP_BEQ)) begin
          nxt = r_pc + 4 + op2; r_taken++;
        end
      end
      OP_JUMP: begin
        wr(rd, r_pc + 4); nxt = a + op2; r_jumps++;
      end
      default: ;  // TRAP and unassigned opcodes: no effect
    endcase
    r_pc = nxt;
    r_retired++;
    return 1;
  endfunction

  function automatic int unsigned ref_run(int unsigned max_steps);
    for (int unsigned i = 0; i < max_steps; i++)
      if (!ref_step()) return i;
    return max_steps;
  endfunction

  // ---------------- program builders ----------------
  logic [31:0] prog [MEMW];
  int unsigned prog_len;

  function automatic void emit(logic [31:0] w);
    prog[prog_len] = w;
    prog_len++;
  endfunction

  function automatic logic [4:0] rreg();
    return 5'($urandom_range(0, 7));
  endfunction

  // Random program of n instructions drawn from every instruction type.
  // Memory operands stay in the data area; branches and jumps go forward.
  function automatic void gen_random(int unsigned n, int unsigned mul_pct);
    int unsigned k, sel;
    logic [5:0] op;
    prog_len = 0;
    // seed registers r1..r7 with distinct values
    for (int r = 1; r < 8; r++) emit(enc_i(OP_ADDI, 5'(r), 0, 16'($urandom)));
    for (int unsigned i = 0; i < n; i++) begin
      sel = $urandom_range(0, 99);
      if (sel < mul_pct) begin
        op = ($urandom_range(0, 1) != 0) ? OP_MULLO : OP_MULHI;
        if ($urandom_range(0, 1) != 0) emit(enc_r(op, rreg(), rreg(), rreg()));
        else emit(enc_i(op | 6'd1, rreg(), rreg(), 16'($urandom)));
      end else begin
        sel = $urandom_range(0, 21);
        case (sel)
          0, 1, 2, 3, 4, 5, 6, 7: begin
            // ALU ops in any legal format
            case ($urandom_range(0, 8))
              0: op = {G_ADD, 2'($urandom)};
              1: op = {G_ADDV, 2'($urandom_range(0, 2))};
              2: op = {G_SUB, 2'($urandom_range(0, 2))};
              3: op = {G_SUBV, 2'($urandom_range(0, 2))};
              4: op = {G_AND, 2'($urandom_range(0, 2))};
              5: op = {G_OR, 2'($urandom_range(0, 2))};
              6: op = {G_XOR, 2'($urandom_range(0, 2))};
              7: op = {G_SHS, 2'($urandom_range(0, 1))};
              default: op = {G_SHZ, 2'($urandom_range(0, 1))};
            endcase
            if (op[1:0] == 2'b00) emit(enc_r(op, rreg(), rreg(), rreg()));
            else emit(enc_i(op, rreg(), rreg(), 16'($urandom)));
          end
          8:  emit(enc_i({G_CMP, 2'($urandom_range(0, 2))}, 0, rreg(), 16'($urandom_range(0, 3))));
          9:  emit(enc_i(($urandom_range(0, 1) != 0) ? OP_SETI : OP_RESETI, 0, 0, 16'($urandom)));
          10: emit(enc_r(OP_GET, rreg(), 0, 0));
          11: emit(enc_r(OP_PUT, 0, rreg(), 0));
          12, 13, 14: emit(enc_i(OP_LW, rreg(), 0, 16'(DATA_BASE + 4 * $urandom_range(0, 15))));
          15, 16: emit(enc_i(OP_SW, rreg(), 0, 16'(DATA_BASE + 4 * $urandom_range(0, 15))));
          17: emit(enc_i(OP_LWD, rreg(), 0, 16'((DATA_BASE >> 2) + $urandom_range(0, 15))));
          18, 19: begin
            k = $urandom_range(0, 3);
            emit(enc_i(($urandom_range(0, 1) != 0) ? OP_BEQ : OP_BNE, rreg(), rreg(), 16'(k)));
          end
          20: begin
            // absolute forward jump: target = r0 + 4 * disp
            k = prog_len + 1 + $urandom_range(0, 2);
            emit(enc_i(OP_JUMP, rreg(), 0, 16'(k)));
          end
          default: emit(enc_r(OP_TRAP, 0, 0, 0));
        endcase
      end
    end
    // pad so that forward branches and jumps land inside the program
    for (int i = 0; i < 4; i++) emit(enc_i(OP_ADDI, 5'd1, 5'd1, 16'd1));
    // store r1..r7 and the PSW, then halt
    for (int r = 1; r < 8; r++) emit(enc_i(OP_SW, 5'(r), 0, 16'(DATA_BASE + 32'h100 + 4 * r)));
    emit(enc_r(OP_GET, 5'd8, 0, 0));
    emit(enc_i(OP_SW, 5'd8, 0, 16'(DATA_BASE + 32'h100)));
    emit(HALT);
  endfunction

  // "Multiply program": mostly multiplies, as in the published experiment.
  function automatic void gen_multiply();
    prog_len = 0;
    emit(enc_i(OP_ADDI, 5'd1, 0, 16'd1234));
    emit(enc_i(OP_ADDI, 5'd2, 0, 16'hFF85));          // -123
    emit(enc_r(OP_MULLO, 5'd3, 5'd1, 5'd2));
    emit(enc_r(OP_MULHI, 5'd4, 5'd1, 5'd2));
    emit(enc_i(OP_MULLOI, 5'd5, 5'd3, 16'd77));
    emit(enc_i(OP_SW, 5'd3, 0, 16'(DATA_BASE)));
    emit(enc_i(OP_SW, 5'd4, 0, 16'(DATA_BASE + 4)));
    emit(enc_i(OP_SW, 5'd5, 0, 16'(DATA_BASE + 8)));
    emit(HALT);
  endfunction

  // "ALU program": additions, shifts and logic operations.
  function automatic void gen_alu();
    prog_len = 0;
    emit(enc_i(OP_ADDI, 5'd1, 0, 16'd100));
    emit(enc_i(OP_ADDX, 5'd2, 0, 16'h8000));
    emit(enc_r(OP_ADD, 5'd3, 5'd1, 5'd2));
    emit(enc_i(OP_SHSI, 5'd4, 5'd2, 16'hFFFC));        // >> 4, sign fill
    emit(enc_i(OP_SHZI, 5'd5, 5'd2, 16'hFFFC));        // >> 4, zero fill
    emit(enc_i(OP_SHZI, 5'd6, 5'd1, 16'd3));           // << 3
    emit(enc_r(OP_XOR, 5'd7, 5'd4, 5'd5));
    emit(enc_r(OP_AND, 5'd8, 5'd7, 5'd3));
    emit(enc_r(OP_OR, 5'd9, 5'd8, 5'd6));
    emit(enc_r(OP_SUBV, 5'd10, 5'd2, 5'd1));
    emit(enc_i(OP_SW, 5'd9, 0, 16'(DATA_BASE)));
    emit(enc_i(OP_SW, 5'd10, 0, 16'(DATA_BASE + 4)));
    emit(HALT);
  endfunction
endpackage
