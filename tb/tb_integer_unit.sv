// tb_integer_unit: drives the execute-stage unit directly.
// Multiplies: random and boundary signed operands, both product words,
// checked against a 64-bit product; the unit must be busy for exactly 32
// cycles and present the result in its 33rd cycle. Also checks ALU results,
// the link and PSW results, PSW updates (flags, PUT, SET, RESET), that
// `hold` freezes a multiply and that `flush` aborts one.
module tb_integer_unit;
  import jam_pkg::*;
  logic        clk = 1'b0, rst = 1'b1;
  logic        valid, hold, flush;
  ctrl_t       ctrl;
  logic [31:0] a, b, link, result, alu_y, psw;
  logic        busy, finished;
  iu_state_e   state;
  int checks = 0, failures = 0;

  integer_unit dut (.clk, .rst, .valid, .hold, .flush, .ctrl, .a, .b, .link,
                    .result, .alu_y, .busy, .finished, .psw, .state);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  // one multiply; returns the number of cycles until it left EX
  task automatic mul(input logic [31:0] x, input logic [31:0] y, input bit hi,
                     input int hold_at);
    longint p;
    int n;
    p = longint'($signed(x)) * longint'($signed(y));
    ctrl = '0;
    ctrl.cex_mult = 1'b1;
    ctrl.cex_multop = hi;
    ctrl.cex_regsel = RES_MUL;
    a = x; b = y; valid = 1'b1;
    n = 1;
    forever begin
      hold = (n == hold_at);
      #1;
      if (!busy && !hold) break;
      @(posedge clk);
      #1;
      n++;
      if (n > 100) break;
    end
    check(result == (hi ? p[63:32] : p[31:0]),
          $sformatf("mul %h * %h hi=%0d: %h", x, y, hi, result));
    check(finished, "finished not high in the last cycle");
    check(n == ((hold_at > 0) ? 34 : 33), $sformatf("multiply took %0d cycles", n));
    @(posedge clk);
    #1 valid = 1'b0;
    hold = 1'b0;
  endtask

  task automatic op(input alu_op_e o, input res_sel_e rs, input logic psw_en,
                    input psw_op_e po, input logic [31:0] x, input logic [31:0] y);
    ctrl = '0;
    ctrl.cex_aluop = o;
    ctrl.cex_regsel = rs;
    ctrl.cex_psw_enable = psw_en;
    ctrl.cex_pswop = po;
    a = x; b = y; valid = 1'b1;
    #1;
  endtask

  initial begin
    logic [31:0] x, y;
    valid = 1'b0; hold = 1'b0; flush = 1'b0; ctrl = '0; a = '0; b = '0; link = 32'h40;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    mul(32'h8000_0000, 32'h8000_0000, 1'b1, 0);
    mul(32'h8000_0000, 32'h8000_0000, 1'b0, 0);
    mul(32'h7FFF_FFFF, 32'h8000_0000, 1'b1, 0);
    mul(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b0, 0);
    mul(32'd1234, -32'sd123, 1'b0, 5);
    for (int t = 0; t < 40; t++) begin
      x = $urandom; y = $urandom;
      if (t % 4 == 1) y = y >> 20;
      mul(x, y, 1'(t % 2), 0);
    end
    // ALU result, ADD
    op(ALU_ADD, RES_ALU, 1'b0, PSW_FLAGS, 32'd5, 32'd7);
    check(result == 32'd12 && alu_y == 32'd12 && !busy, "ADD result");
    // link result
    op(ALU_ADD, RES_LINK, 1'b0, PSW_FLAGS, 32'd5, 32'd7);
    check(result == 32'h40, "link result");
    // CMP 3 - 5: N=1 Z=0 C=0 V=0
    op(ALU_SUB, RES_ALU, 1'b1, PSW_FLAGS, 32'd3, 32'd5);
    @(posedge clk); #1;
    check(psw[3:0] == 4'b1000, $sformatf("flags after 3-5: %b", psw[3:0]));
    // ADDV overflow: 7fffffff + 1: N=1 Z=0 C=0 V=1
    op(ALU_ADD, RES_ALU, 1'b1, PSW_FLAGS, 32'h7FFF_FFFF, 32'd1);
    @(posedge clk); #1;
    check(psw[3:0] == 4'b1001, $sformatf("flags after overflow: %b", psw[3:0]));
    op(ALU_PASS, RES_ALU, 1'b1, PSW_PUT, 32'h1234_5670, 32'h0);
    @(posedge clk); #1;
    check(psw == 32'h1234_5670, "PUT");
    op(ALU_PASS, RES_ALU, 1'b1, PSW_SET, 32'h0, 32'h0000_000F);
    @(posedge clk); #1;
    check(psw == 32'h1234_567F, "SET");
    op(ALU_PASS, RES_ALU, 1'b1, PSW_RESET, 32'h0, 32'h1200_0003);
    @(posedge clk); #1;
    check(psw == 32'h0034_567C, "RESET");
    op(ALU_PASS, RES_PSW, 1'b0, PSW_FLAGS, 32'h0, 32'h0);
    check(result == 32'h0034_567C, "GET result");
    // a held PSW write must not happen
    hold = 1'b1;
    op(ALU_PASS, RES_ALU, 1'b1, PSW_PUT, 32'hDEAD_BEEF, 32'h0);
    @(posedge clk); #1;
    check(psw == 32'h0034_567C, "held PUT wrote the PSW");
    hold = 1'b0;
    // flush aborts a multiply
    ctrl = '0; ctrl.cex_mult = 1'b1; ctrl.cex_regsel = RES_MUL; a = 3; b = 4; valid = 1'b1;
    @(posedge clk); #1;
    repeat (3) @(posedge clk);
    #1 flush = 1'b1; valid = 1'b0;
    @(posedge clk);
    #1 flush = 1'b0;
    check(state == IU_IDLE, "flush did not abort the multiply");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
