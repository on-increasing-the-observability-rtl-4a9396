// tb_jam_core: pipeline tests with simple word-array memories.
// Directed timing: each hazard is run twice, once with a dependent
// instruction and once with an independent one; the difference in cycles
// until HALT reaches ID must equal the stall the pipeline rules give
// (load-use 1, branch after ALU 1, branch after load 2, multiply 32 extra
// cycles, store 1, taken branch 1 bubble, jump from MEM 3 squashed).
// Every directed program's results and a set of random programs are also
// compared with the instruction-set reference model.
module tb_jam_core;
  import jam_pkg::*;
  import jam_ref_pkg::*;

  logic        clk = 1'b0, rst = 1'b1;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic        imem_read, dmem_read, dmem_write;
  obs_t        obs;
  logic [31:0] imem [MEMW];
  logic [31:0] dmem [MEMW];
  int checks = 0, failures = 0;
  int cyc = 0;

  jam_core dut (.clk, .rst, .imem_addr, .imem_read, .imem_rdata,
                .dmem_addr, .dmem_wdata, .dmem_read, .dmem_write, .dmem_rdata, .obs);

  assign imem_rdata = imem[imem_addr % MEMW];
  assign dmem_rdata = dmem_read ? dmem[dmem_addr % MEMW] : 32'h0;
  always @(posedge clk) if (dmem_write) dmem[dmem_addr % MEMW] <= dmem_wdata;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // returns cycles from reset release until HALT is first in ID (the
  // instruction at word k is first in ID k+1 cycles after reset without stalls)
  task automatic run(input string name, output int cycles);
    int start, hcnt;
    logic [31:0] v;
    rst = 1'b1;
    ref_reset();
    for (int i = 0; i < int'(MEMW); i++) begin
      r_imem[i] = (i < int'(prog_len)) ? prog[i] : 32'h0;
      imem[i] = r_imem[i];
      v = $urandom;
      r_dmem[i] = v;
      dmem[i] = v;
    end
    void'(ref_run(20000));
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    start = cyc;
    cycles = -1;
    hcnt = 0;
    while (hcnt < 50 && cyc - start < 50000) begin
      @(posedge clk);
      #1;
      if (dut.ifid_q.valid && dut.ifid_q.instr == HALT) begin
        if (cycles < 0) cycles = cyc - start;
        hcnt++;
      end
    end
    for (int r = 0; r < 32; r++)
      check(dut.u_rf.regs[r] == r_regs[r],
            $sformatf("%s: r%0d = %h, expected %h", name, r, dut.u_rf.regs[r], r_regs[r]));
    check(dut.psw == r_psw, $sformatf("%s: psw", name));
    for (int w = DATA_BASE / 4; w < DATA_BASE / 4 + 128; w++)
      check(dmem[w] == r_dmem[w], $sformatf("%s: mem[%h]", name, w));
  endtask

  // a pair of two-instruction snippets, dependent and independent
  task automatic pair(input string name, input logic [31:0] i0, input logic [31:0] dep,
                      input logic [31:0] indep, input int expect_extra);
    int c_dep, c_ind;
    prog_len = 0;
    emit(enc_i(OP_ADDI, 5'd3, 0, 16'd9));
    emit(enc_i(OP_ADDI, 5'd4, 0, 16'd9));
    emit(i0); emit(dep);
    for (int i = 0; i < 4; i++) emit(enc_i(OP_ADDI, 5'd6, 5'd6, 16'd1));
    emit(HALT);
    run({name, " dependent"}, c_dep);
    prog_len = 0;
    emit(enc_i(OP_ADDI, 5'd3, 0, 16'd9));
    emit(enc_i(OP_ADDI, 5'd4, 0, 16'd9));
    emit(i0); emit(indep);
    for (int i = 0; i < 4; i++) emit(enc_i(OP_ADDI, 5'd6, 5'd6, 16'd1));
    emit(HALT);
    run({name, " independent"}, c_ind);
    check(c_dep - c_ind == expect_extra,
          $sformatf("%s: %0d extra cycles, expected %0d", name, c_dep - c_ind, expect_extra));
  endtask

  initial begin
    int c0, c1;
    // load-use: 1 stall
    pair("load-use", enc_i(OP_LW, 5'd1, 0, 16'(DATA_BASE)),
         enc_r(OP_ADD, 5'd2, 5'd1, 5'd1), enc_r(OP_ADD, 5'd2, 5'd3, 5'd3), 1);
    // branch on a value computed just before: 1 stall
    pair("branch after ALU", enc_i(OP_ADDI, 5'd1, 0, 16'd5),
         enc_i(OP_BEQ, 5'd1, 5'd0, 16'd0), enc_i(OP_BEQ, 5'd3, 5'd0, 16'd0), 1);
    // branch on a value loaded just before: 2 stalls
    pair("branch after load", enc_i(OP_LW, 5'd1, 0, 16'(DATA_BASE)),
         enc_i(OP_BEQ, 5'd1, 5'd0, 16'd0), enc_i(OP_BEQ, 5'd3, 5'd0, 16'd0), 2);
    // multiply: 32 extra cycles against an ADD
    pair("multiply", enc_r(OP_ADD, 5'd8, 5'd8, 5'd8),
         enc_r(OP_MULLO, 5'd2, 5'd3, 5'd4), enc_r(OP_ADD, 5'd2, 5'd3, 5'd4), 32);
    // store: 1 stall against an ADD
    pair("store", enc_r(OP_ADD, 5'd8, 5'd8, 5'd8),
         enc_i(OP_SW, 5'd3, 0, 16'(DATA_BASE)), enc_r(OP_ADD, 5'd2, 5'd3, 5'd4), 1);
    // taken branch over nothing (disp 0): 1 bubble
    pair("taken branch", enc_r(OP_ADD, 5'd8, 5'd8, 5'd8),
         enc_i(OP_BEQ, 5'd3, 5'd4, 16'd0), enc_i(OP_BNE, 5'd3, 5'd4, 16'd0), 1);
    // jump to the next instruction: 3 squashed
    pair("jump", enc_r(OP_ADD, 5'd8, 5'd8, 5'd8),
         enc_i(OP_JUMP, 5'd7, 0, 16'd4), enc_i(OP_ADDI, 5'd7, 0, 16'd16), 3);
    // forwarding: back-to-back dependent ALU chain costs nothing
    prog_len = 0;
    for (int i = 1; i < 8; i++) emit(enc_i(OP_ADDI, 5'(i), 5'(i - 1), 16'(i)));
    emit(HALT);
    run("forward chain", c0);
    prog_len = 0;
    for (int i = 1; i < 8; i++) emit(enc_i(OP_ADDI, 5'(i), 5'd0, 16'(i)));
    emit(HALT);
    run("independent chain", c1);
    check(c0 == c1, "dependent ALU chain stalled");
    check(c1 == 7 + 1, $sformatf("7 instructions took %0d cycles to HALT in ID", c1));
    for (int s = 0; s < 6; s++) begin
      gen_random(120, 5);
      run($sformatf("random%0d", s), c0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
