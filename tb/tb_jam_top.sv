// tb_jam_top: end-to-end test of the JAM processor at its default size
// (two 512K x 64 SRAM arrays, 87-bit observation tree).
//
// Runs the multiply program, the ALU program and a series of random
// programs covering every instruction type. After each program the register
// file, the PSW and the data area are compared with the instruction-set
// reference model (jam_ref_pkg). Every cycle the observation pin is compared
// with the parity of the monitored bits. Per program it also checks that the
// multiply stall lasted 32 cycles per multiply and the store stall one cycle
// per store, and over the whole run that every pipeline mechanism (load-use,
// branch and store stalls, multiply stall, both forwarding paths in EX and
// ID, taken branches, jumps from MEM) happened at least once.
module tb_jam_top;
  import jam_pkg::*;
  import jam_ref_pkg::*;

  localparam int unsigned NRAND = 12;

  logic clk = 1'b0;
  logic rst;
  logic [18:0] ia, da;
  logic [7:0]  ics, dcs;
  logic        ioe, iwe, doe, dwe;
  logic [63:0] iwd, ird, dwd, drd;
  logic        obs_out;

  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  jam_top dut (
    .clk, .rst,
    .imem_sram_addr(ia), .imem_sram_cs_n(ics), .imem_sram_oe_n(ioe), .imem_sram_we_n(iwe),
    .imem_sram_wdata(iwd), .imem_sram_rdata(ird),
    .dmem_sram_addr(da), .dmem_sram_cs_n(dcs), .dmem_sram_oe_n(doe), .dmem_sram_we_n(dwe),
    .dmem_sram_wdata(dwd), .dmem_sram_rdata(drd),
    .obs_out
  );

  sram_model #(.AW(19)) u_isram (.clk, .addr(ia), .cs_n(ics), .oe_n(ioe), .we_n(iwe),
                                 .wdata(iwd), .rdata(ird));
  sram_model #(.AW(19)) u_dsram (.clk, .addr(da), .cs_n(dcs), .oe_n(doe), .we_n(dwe),
                                 .wdata(dwd), .rdata(drd));

  // mechanism counters
  int n_lw = 0, n_br = 0, n_mul = 0, n_st = 0, n_fex1 = 0, n_fex2 = 0;
  int n_fid1 = 0, n_fid2 = 0, n_taken = 0, n_jump = 0, n_obs = 0;
  int p_mul, p_st;
  bit counting = 0;

  always @(negedge clk) begin
    if (!rst) begin
      checks++;
      if (obs_out !== ^dut.u_core.obs) begin
        failures++;
        if (failures < 10) $display("FAIL obs_out at cycle %0d", cyc);
      end
      n_obs += int'(obs_out);
      if (dut.u_core.stall_lw) n_lw++;
      if (dut.u_core.stall_branch) n_br++;
      if (dut.u_core.stall_mul && !dut.u_core.flush_jump && !dut.u_core.stall_store) begin n_mul++; p_mul++; end
      if (dut.u_core.stall_store) begin n_st++; p_st++; end
      if (dut.u_core.fwd_ex_a == FWD_EXMEM || dut.u_core.fwd_ex_b == FWD_EXMEM) n_fex1++;
      if (dut.u_core.fwd_ex_a == FWD_MEMWB || dut.u_core.fwd_ex_b == FWD_MEMWB) n_fex2++;
      if (dut.u_core.id_ctrl.cid_cmp && dut.u_core.ifid_q.valid &&
          (dut.u_core.fwd_id_a == FWD_EXMEM || dut.u_core.fwd_id_b == FWD_EXMEM)) n_fid1++;
      if (dut.u_core.id_ctrl.cid_cmp && dut.u_core.ifid_q.valid &&
          (dut.u_core.fwd_id_a == FWD_MEMWB || dut.u_core.fwd_id_b == FWD_MEMWB)) n_fid2++;
      if (dut.u_core.obs.if_zero) n_taken++;
      if (dut.u_core.flush_jump) n_jump++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Load prog[] into both memories, run the model and the processor, compare.
  task automatic run_program(input string name);
    int unsigned steps, wait_cycles, start;
    logic [31:0] v;
    rst = 1'b1;
    ref_reset();
    for (int i = 0; i < int'(MEMW); i++) begin
      r_imem[i] = (i < int'(prog_len)) ? prog[i] : 32'h0;
      u_isram.load_word(i, r_imem[i]);
      v = $urandom;
      r_dmem[i] = v;
      u_dsram.load_word(i, v);
    end
    steps = ref_run(20000);
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    p_mul = 0;
    p_st = 0;
    start = cyc;
    wait_cycles = 0;
    // run until HALT is decoded, then let the pipeline drain
    while (wait_cycles < 60 && cyc - start < 100000) begin
      @(posedge clk);
      if (dut.u_core.ifid_q.valid && dut.u_core.ifid_q.instr == HALT) wait_cycles++;
    end
    #1;
    for (int r = 0; r < 32; r++)
      check(dut.u_core.u_rf.regs[r] == r_regs[r],
            $sformatf("%s: r%0d = %h, expected %h", name, r, dut.u_core.u_rf.regs[r], r_regs[r]));
    check(dut.u_core.psw == r_psw,
          $sformatf("%s: psw = %h, expected %h", name, dut.u_core.psw, r_psw));
    for (int w = DATA_BASE / 4; w < DATA_BASE / 4 + 128; w++)
      check(u_dsram.peek_word(w) == r_dmem[w],
            $sformatf("%s: mem[%h] = %h, expected %h", name, w, u_dsram.peek_word(w), r_dmem[w]));
    check(p_mul == 32 * int'(r_muls),
          $sformatf("%s: multiply stall %0d cycles for %0d multiplies", name, p_mul, r_muls));
    check(p_st == int'(r_stores),
          $sformatf("%s: store stall %0d cycles for %0d stores", name, p_st, r_stores));
    $display("%s: %0d instructions, %0d cycles, %0d mul, %0d ld, %0d st, %0d br (%0d taken), %0d jumps",
             name, steps, cyc - start - 60, r_muls, r_loads, r_stores, r_branches, r_taken, r_jumps);
  endtask

  initial begin
    rst = 1'b1;
    gen_multiply();
    run_program("multiply");
    check(r_dmem[DATA_BASE / 4] == 32'(1234 * -123), "multiply program result");
    gen_alu();
    run_program("alu");
    for (int s = 0; s < NRAND; s++) begin
      gen_random(150, (s % 3 == 0) ? 10 : 2);
      run_program($sformatf("random%0d", s));
    end
    check(n_lw > 0, "load-use stall never happened");
    check(n_br > 0, "branch stall never happened");
    check(n_mul > 0, "multiply stall never happened");
    check(n_st > 0, "store stall never happened");
    check(n_fex1 > 0, "EX forwarding from EX/MEM never happened");
    check(n_fex2 > 0, "EX forwarding from MEM/WB never happened");
    check(n_fid1 > 0, "branch forwarding from EX/MEM never happened");
    check(n_fid2 > 0, "branch forwarding from MEM/WB never happened");
    check(n_taken > 0, "taken branch never happened");
    check(n_jump > 0, "jump never happened");
    check(n_obs > 0, "observation pin never toggled");
    $display("mechanisms: lw %0d br %0d mul %0d st %0d fexA %0d fexB %0d fidA %0d fidB %0d taken %0d jump %0d",
             n_lw, n_br, n_mul, n_st, n_fex1, n_fex2, n_fid1, n_fid2, n_taken, n_jump);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
