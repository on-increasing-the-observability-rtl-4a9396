// tb_control_unit: decodes all 64 opcodes and compares the main control
// signals with a table written out in this testbench: which opcodes are
// assigned (47), which write a register, access memory, multiply, branch,
// jump, update the PSW, and that the immediate format is opcode[1:0].
module tb_control_unit;
  import jam_pkg::*;
  logic [5:0] opcode;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  control_unit dut (.opcode, .ctrl);

  // expected: {legal, wb, rd, wr, mul, br, psw, jump, trap, useimm}
  function automatic logic [9:0] expect_of(int op);
    int g, f;
    g = op / 4;
    f = op % 4;
    case (g)
      0:       return {1'b1, 1'b1, 6'b0, 1'b0, f != 0};                 // ADD
      1:       if (f == 3) return {1'b1, 1'b1, 2'b0, 3'b0, 1'b1, 1'b0, 1'b1}; // JUMP
               else return {1'b1, 1'b1, 4'b0, 1'b1, 2'b0, f != 0};    // ADDV
      2:       if (f == 3) return {1'b1, 1'b0, 3'b0, 1'b1, 4'b0};        // BEQ
               else return {1'b1, 1'b1, 7'b0, f != 0};                  // SUB
      3:       if (f == 3) return {1'b1, 1'b0, 3'b0, 1'b1, 4'b0};        // BNE
               else return {1'b1, 1'b1, 4'b0, 1'b1, 2'b0, f != 0};    // SUBV
      4, 5: begin
        if (f < 2)  return {1'b1, 1'b1, 2'b0, 1'b1, 4'b0, f != 0};     // MUL
        if (f == 2 && g == 4) return {1'b1, 1'b1, 8'b0};               // GET
        if (f == 2) return {1'b1, 1'b0, 4'b0, 1'b1, 3'b0};             // PUT
        if (g == 4) return {1'b1, 1'b1, 1'b1, 6'b0, 1'b1};             // LW disp
        return {1'b1, 1'b0, 1'b0, 1'b1, 5'b0, 1'b1};                   // SW disp
      end
      6:       if (f == 3) return {1'b1, 6'b0, 1'b0, 1'b1, 1'b0};        // TRAP
               else return {1'b1, 1'b1, 7'b0, f != 0};                  // AND
      7, 8, 11: if (f == 3) return '0;
               else if (g == 11) return {1'b1, 1'b0, 4'b0, 1'b1, 2'b0, f != 0}; // CMP
               else return {1'b1, 1'b1, 7'b0, f != 0};                  // OR XOR
      9, 10:   if (f >= 2) return '0;
               else return {1'b1, 1'b1, 7'b0, f != 0};                  // SHS SHZ
      12:      if (f == 1) return {1'b1, 1'b1, 1'b1, 6'b0, 1'b1}; else return '0;  // LW
      13:      if (f == 1) return {1'b1, 1'b0, 1'b0, 1'b1, 5'b0, 1'b1}; else return '0; // SW
      default: if (f >= 2) return '0;
               else return {1'b1, 1'b0, 4'b0, 1'b1, 2'b0, f != 0};     // SET RESET
    endcase
  endfunction

  initial begin
    automatic int legal = 0;
    logic [9:0] got, exp;
    for (int op = 0; op < 64; op++) begin
      opcode = 6'(op);
      #1;
      exp = expect_of(op);
      got = {!ctrl.c_illegal, ctrl.cwb_enable, ctrl.cm_read, ctrl.cm_write, ctrl.cex_mult,
             ctrl.cid_cmp, ctrl.cex_psw_enable, ctrl.cm_jump, ctrl.cm_trap, ctrl.cex_bsel};
      checks++;
      if (got !== exp) begin
        failures++;
        $display("FAIL opcode %0d: got %b expected %b", op, got, exp);
      end
      checks++;
      if (ctrl.c_immmode !== imm_mode_e'(op % 4)) failures++;
      if (!ctrl.c_illegal) legal++;
      // a store and a branch read rd through port B
      if (exp[6] || exp[4]) begin
        checks++;
        if (!(ctrl.cid_bsel && ctrl.cid_use_b)) begin
          failures++;
          $display("FAIL opcode %0d does not read rd", op);
        end
      end
    end
    // operation and result selections for a few opcodes
    opcode = 6'd41; #1;  // SHZ immediate
    checks++; if (ctrl.cex_aluop !== ALU_SHZ) begin failures++; $display("FAIL select at opcode %0d", opcode); end
    opcode = 6'd20; #1;  // MUL-Hi register
    checks++; if (!(ctrl.cex_multop && ctrl.cex_regsel == RES_MUL)) begin failures++; $display("FAIL select at opcode %0d", opcode); end
    opcode = 6'd16; #1;  // MUL-Lo register
    checks++; if (!(!ctrl.cex_multop && ctrl.cex_regsel == RES_MUL)) begin failures++; $display("FAIL select at opcode %0d", opcode); end
    opcode = 6'd18; #1;  // GET
    checks++; if (ctrl.cex_regsel !== RES_PSW) begin failures++; $display("FAIL select at opcode %0d", opcode); end
    opcode = 6'd7; #1;   // JUMP
    checks++; if (ctrl.cex_regsel !== RES_LINK) begin failures++; $display("FAIL select at opcode %0d", opcode); end
    opcode = 6'd8; #1;   // SUB
    checks++; if (ctrl.cex_aluop !== ALU_SUB) begin failures++; $display("FAIL select at opcode %0d", opcode); end
    opcode = 6'd48 + 1; #1;  // LW
    checks++; if (!(ctrl.cwb_sel && ctrl.cm_valid_reg && !ctrl.cex_valid_res)) begin failures++; $display("FAIL select at opcode %0d", opcode); end
    checks++;
    if (legal != 47) begin
      failures++;
      $display("FAIL %0d assigned opcodes", legal);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
