// tb_fault_observation: the single-stuck-line experiment on the observed
// control signals.
//
// Two copies of the processor run the same program from the same memory
// contents: a reference copy and a copy with one control signal stuck at 0
// or 1 (applied with force). Each cycle the testbench compares the two
// observation pins and, separately, all memory-side pins of both SRAM
// interfaces (address, chip selects, enables, write data), and records the
// first cycle at which each reveals the fault ("ND" if never). Campaigns:
// control-signal faults under the multiply program and the ALU program for
// 200 cycles each; faults on ALU and immediate-extension nets (not fed to the
// tree) under the multiply program; and all faults under a random
// instruction sequence for 500 cycles, with a summary of detection counts
// and mean first-detection cycles, repeated for the decoder outputs alone.
// Checks: a fault-free pair never differs; in every cycle the pin difference
// equals the parity of the differing monitored bits; every cycle in which
// exactly one monitored bit differs is caught by the pin; and the pin
// catches at least one fault that the memory pins never show.
module tb_fault_observation;
  import jam_pkg::*;
  import jam_ref_pkg::*;

  // Signals 0..27 are monitored control signals (0..17 are decoder outputs);
  // 28..40 are datapath nets around the ALU and the immediate extension unit
  // (ALU inputs and output, immediate bits 0 and 15 of the instruction, the
  // widened immediate and its copy in ID/EX), none of which feeds the
  // observation tree directly. Instruction bit 15 is also a bit of the rs2
  // field, so it reaches the tree through id_rb.
  localparam int NCTRL = 28;
  localparam int NSIG  = 41;

  logic clk = 1'b0;
  logic rst;

  typedef struct packed {
    logic [18:0] ia;  logic [7:0] ics; logic ioe; logic iwe; logic [63:0] iwd;
    logic [18:0] da;  logic [7:0] dcs; logic doe; logic dwe; logic [63:0] dwd;
  } pins_t;

  pins_t       p_ref, p_bad;
  logic [63:0] ird_ref, drd_ref, ird_bad, drd_bad;
  logic        obs_ref, obs_bad;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  jam_top u_ref (
    .clk, .rst,
    .imem_sram_addr(p_ref.ia), .imem_sram_cs_n(p_ref.ics), .imem_sram_oe_n(p_ref.ioe),
    .imem_sram_we_n(p_ref.iwe), .imem_sram_wdata(p_ref.iwd), .imem_sram_rdata(ird_ref),
    .dmem_sram_addr(p_ref.da), .dmem_sram_cs_n(p_ref.dcs), .dmem_sram_oe_n(p_ref.doe),
    .dmem_sram_we_n(p_ref.dwe), .dmem_sram_wdata(p_ref.dwd), .dmem_sram_rdata(drd_ref),
    .obs_out(obs_ref)
  );
  sram_model u_ref_i (.clk, .addr(p_ref.ia), .cs_n(p_ref.ics), .oe_n(p_ref.ioe), .we_n(p_ref.iwe),
                      .wdata(p_ref.iwd), .rdata(ird_ref));
  sram_model u_ref_d (.clk, .addr(p_ref.da), .cs_n(p_ref.dcs), .oe_n(p_ref.doe), .we_n(p_ref.dwe),
                      .wdata(p_ref.dwd), .rdata(drd_ref));

  jam_top u_bad (
    .clk, .rst,
    .imem_sram_addr(p_bad.ia), .imem_sram_cs_n(p_bad.ics), .imem_sram_oe_n(p_bad.ioe),
    .imem_sram_we_n(p_bad.iwe), .imem_sram_wdata(p_bad.iwd), .imem_sram_rdata(ird_bad),
    .dmem_sram_addr(p_bad.da), .dmem_sram_cs_n(p_bad.dcs), .dmem_sram_oe_n(p_bad.doe),
    .dmem_sram_we_n(p_bad.dwe), .dmem_sram_wdata(p_bad.dwd), .dmem_sram_rdata(drd_bad),
    .obs_out(obs_bad)
  );
  sram_model u_bad_i (.clk, .addr(p_bad.ia), .cs_n(p_bad.ics), .oe_n(p_bad.ioe), .we_n(p_bad.iwe),
                      .wdata(p_bad.iwd), .rdata(ird_bad));
  sram_model u_bad_d (.clk, .addr(p_bad.da), .cs_n(p_bad.dcs), .oe_n(p_bad.doe), .we_n(p_bad.dwe),
                      .wdata(p_bad.dwd), .rdata(drd_bad));

  function automatic string sig_name(int s);
    case (s)
      0:  return "cid_cmp";            1:  return "cid_bsel";
      2:  return "cid_beq";            3:  return "cex_bsel";
      4:  return "cex_aluop(0)";       5:  return "cex_aluop(2)";
      6:  return "cex_regsel(0)";      7:  return "cex_regsel(1)";
      8:  return "cex_multop";         9:  return "cex_psw_enable";
      10: return "cex_valid_res";      11: return "cex_valid_reg";
      12: return "cm_read";            13: return "cm_write";
      14: return "cm_valid_mem";       15: return "cm_valid_reg";
      16: return "cwb_sel";            17: return "cwb_enable";
      18: return "id_rb(0)";           19: return "id_rb(4)";
      20: return "ex_wb_dest_buf(0)";  21: return "ex_wb_dest_buf(4)";
      22: return "ex_wb_valid_buf";    23: return "wb_rw(0)";
      24: return "wb_rw(4)";           25: return "mem_jump_trap";
      26: return "ex_mc_finished";     27: return "exmem_reg.cm_write";
      28: return "alu_op(0)";          29: return "alu_op(2)";
      30: return "alu_a(0)";           31: return "alu_b(0)";
      32: return "alu_b(31)";          33: return "alu_y(0)";
      34: return "alu_y(31)";          35: return "idex_imm(0)";
      36: return "idex_imm(31)";        37: return "imm(0)";
      38: return "imm(15)";            39: return "imm_ext(0)";
      default: return "imm_ext(31)";
    endcase
  endfunction

  task automatic inject(int s, logic v);
    case (s)
      0:  force u_bad.u_core.u_ctrl.ctrl.cid_cmp = v;
      1:  force u_bad.u_core.u_ctrl.ctrl.cid_bsel = v;
      2:  force u_bad.u_core.u_ctrl.ctrl.cid_beq = v;
      3:  force u_bad.u_core.u_ctrl.ctrl.cex_bsel = v;
      4:  force u_bad.u_core.u_ctrl.ctrl.cex_aluop[0] = v;
      5:  force u_bad.u_core.u_ctrl.ctrl.cex_aluop[2] = v;
      6:  force u_bad.u_core.u_ctrl.ctrl.cex_regsel[0] = v;
      7:  force u_bad.u_core.u_ctrl.ctrl.cex_regsel[1] = v;
      8:  force u_bad.u_core.u_ctrl.ctrl.cex_multop = v;
      9:  force u_bad.u_core.u_ctrl.ctrl.cex_psw_enable = v;
      10: force u_bad.u_core.u_ctrl.ctrl.cex_valid_res = v;
      11: force u_bad.u_core.u_ctrl.ctrl.cex_valid_reg = v;
      12: force u_bad.u_core.u_ctrl.ctrl.cm_read = v;
      13: force u_bad.u_core.u_ctrl.ctrl.cm_write = v;
      14: force u_bad.u_core.u_ctrl.ctrl.cm_valid_mem = v;
      15: force u_bad.u_core.u_ctrl.ctrl.cm_valid_reg = v;
      16: force u_bad.u_core.u_ctrl.ctrl.cwb_sel = v;
      17: force u_bad.u_core.u_ctrl.ctrl.cwb_enable = v;
      18: force u_bad.u_core.id_rb[0] = v;
      19: force u_bad.u_core.id_rb[4] = v;
      20: force u_bad.u_core.idex_q.rd[0] = v;
      21: force u_bad.u_core.idex_q.rd[4] = v;
      22: force u_bad.u_core.idex_q.valid = v;
      23: force u_bad.u_core.memwb_q.rd[0] = v;
      24: force u_bad.u_core.memwb_q.rd[4] = v;
      25: force u_bad.u_core.flush_jump = v;
      26: force u_bad.u_core.u_iu.finished = v;
      27: force u_bad.u_core.exmem_q.ctrl.cm_write = v;
      28: force u_bad.u_core.u_iu.alu_op[0] = v;
      29: force u_bad.u_core.u_iu.alu_op[2] = v;
      30: force u_bad.u_core.u_iu.alu_a[0] = v;
      31: force u_bad.u_core.u_iu.alu_b[0] = v;
      32: force u_bad.u_core.u_iu.alu_b[31] = v;
      33: force u_bad.u_core.u_iu.alu_y[0] = v;
      34: force u_bad.u_core.u_iu.alu_y[31] = v;
      35: force u_bad.u_core.idex_q.imm[0] = v;
      36: force u_bad.u_core.idex_q.imm[31] = v;
      37: force u_bad.u_core.ifid_q.instr[0] = v;
      38: force u_bad.u_core.ifid_q.instr[15] = v;
      39: force u_bad.u_core.u_imm.ext[0] = v;
      default: force u_bad.u_core.u_imm.ext[31] = v;
    endcase
  endtask

  task automatic release_all();
    release u_bad.u_core.u_ctrl.ctrl.cid_cmp;
    release u_bad.u_core.u_ctrl.ctrl.cid_bsel;
    release u_bad.u_core.u_ctrl.ctrl.cid_beq;
    release u_bad.u_core.u_ctrl.ctrl.cex_bsel;
    release u_bad.u_core.u_ctrl.ctrl.cex_aluop[0];
    release u_bad.u_core.u_ctrl.ctrl.cex_aluop[2];
    release u_bad.u_core.u_ctrl.ctrl.cex_regsel[0];
    release u_bad.u_core.u_ctrl.ctrl.cex_regsel[1];
    release u_bad.u_core.u_ctrl.ctrl.cex_multop;
    release u_bad.u_core.u_ctrl.ctrl.cex_psw_enable;
    release u_bad.u_core.u_ctrl.ctrl.cex_valid_res;
    release u_bad.u_core.u_ctrl.ctrl.cex_valid_reg;
    release u_bad.u_core.u_ctrl.ctrl.cm_read;
    release u_bad.u_core.u_ctrl.ctrl.cm_write;
    release u_bad.u_core.u_ctrl.ctrl.cm_valid_mem;
    release u_bad.u_core.u_ctrl.ctrl.cm_valid_reg;
    release u_bad.u_core.u_ctrl.ctrl.cwb_sel;
    release u_bad.u_core.u_ctrl.ctrl.cwb_enable;
    release u_bad.u_core.id_rb[0];
    release u_bad.u_core.id_rb[4];
    release u_bad.u_core.idex_q.rd[0];
    release u_bad.u_core.idex_q.rd[4];
    release u_bad.u_core.idex_q.valid;
    release u_bad.u_core.memwb_q.rd[0];
    release u_bad.u_core.memwb_q.rd[4];
    release u_bad.u_core.flush_jump;
    release u_bad.u_core.u_iu.finished;
    release u_bad.u_core.exmem_q.ctrl.cm_write;
    release u_bad.u_core.u_iu.alu_op[0];
    release u_bad.u_core.u_iu.alu_op[2];
    release u_bad.u_core.u_iu.alu_a[0];
    release u_bad.u_core.u_iu.alu_b[0];
    release u_bad.u_core.u_iu.alu_b[31];
    release u_bad.u_core.u_iu.alu_y[0];
    release u_bad.u_core.u_iu.alu_y[31];
    release u_bad.u_core.idex_q.imm[0];
    release u_bad.u_core.idex_q.imm[31];
    release u_bad.u_core.ifid_q.instr[0];
    release u_bad.u_core.ifid_q.instr[15];
    release u_bad.u_core.u_imm.ext[0];
    release u_bad.u_core.u_imm.ext[31];
  endtask

  function automatic int popcount(logic [OBS_BITS-1:0] v);
    int n = 0;
    for (int i = 0; i < int'(OBS_BITS); i++) n += int'(v[i]);
    return n;
  endfunction

  int n_single = 0, n_xor_only = 0, n_cpu_only = 0, n_both = 0, n_xor_first = 0;
  int n_runs = 0;

  // Run the current program on both copies for `cycles` cycles; s < 0 means
  // no fault. Returns the first detection cycles (0 = not detected).
  task automatic run_pair(int s, logic v, int cycles, output int c_xor, output int c_cpu);
    logic [31:0] w;
    logic [OBS_BITS-1:0] d;
    rst = 1'b1;
    release_all();
    for (int i = 0; i < int'(MEMW); i++) begin
      w = (i < int'(prog_len)) ? prog[i] : 32'h0;
      u_ref_i.load_word(i, w);
      u_bad_i.load_word(i, w);
      w = 32'(i * 32'h9E37_79B9);
      u_ref_d.load_word(i, w);
      u_bad_d.load_word(i, w);
    end
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    if (s >= 0) inject(s, v);
    c_xor = 0;
    c_cpu = 0;
    for (int c = 1; c <= cycles; c++) begin
      @(negedge clk);
      d = u_ref.u_core.obs ^ u_bad.u_core.obs;
      checks++;
      if ((obs_ref ^ obs_bad) != ^d) begin
        failures++;
        $display("FAIL pin difference is not the parity of the monitored differences");
      end
      if (popcount(d) == 1) begin
        n_single++;
        checks++;
        if (obs_ref == obs_bad) begin
          failures++;
          $display("FAIL a single differing monitored bit was not caught");
        end
      end
      if (c_xor == 0 && obs_ref != obs_bad) c_xor = c;
      if (c_cpu == 0 && p_ref != p_bad) c_cpu = c;
      @(posedge clk);
    end
    release_all();
    n_runs++;
  endtask

  function automatic string cyc_str(int c);
    return (c == 0) ? "ND" : $sformatf("%0d", c);
  endfunction

  // Per-campaign statistics: detected faults, faults seen only at the pin,
  // and the sums of first-detection cycles with the pin and memory pins
  // together and with the memory pins alone.
  int st_n, st_det, st_xor_only, st_sum_any, st_n_any, st_sum_cpu, st_n_cpu;

  task automatic campaign(string prog_name, int cycles, int s_lo, int s_hi);
    int cx0, cc0, cx1, cc1;
    st_n = 0; st_det = 0; st_xor_only = 0;
    st_sum_any = 0; st_n_any = 0; st_sum_cpu = 0; st_n_cpu = 0;
    $display("%s program, %0d cycles:  signal  s-a-0 XOR CPU  s-a-1 XOR CPU", prog_name, cycles);
    run_pair(-1, 1'b0, cycles, cx0, cc0);
    checks++;
    if (cx0 != 0 || cc0 != 0) begin
      failures++;
      $display("FAIL fault-free copies differ");
    end
    for (int s = s_lo; s < s_hi; s++) begin
      run_pair(s, 1'b0, cycles, cx0, cc0);
      run_pair(s, 1'b1, cycles, cx1, cc1);
      for (int k = 0; k < 2; k++) begin
        int cx, cc;
        cx = (k != 0) ? cx1 : cx0;
        cc = (k != 0) ? cc1 : cc0;
        st_n++;
        if (cx != 0 || cc != 0) begin
          st_det++;
          st_sum_any += (cx == 0) ? cc : (cc == 0) ? cx : (cx < cc ? cx : cc);
          st_n_any++;
        end
        if (cc != 0) begin
          st_sum_cpu += cc;
          st_n_cpu++;
        end
        if (cx != 0 && cc == 0) begin n_xor_only++; st_xor_only++; end
        if (cx == 0 && cc != 0) n_cpu_only++;
        if (cx != 0 && cc != 0) begin
          n_both++;
          if (cx <= cc) n_xor_first++;
        end
      end
      if (cx0 != 0 || cc0 != 0 || cx1 != 0 || cc1 != 0)
        $display("  %-20s %4s %4s   %4s %4s", sig_name(s), cyc_str(cx0), cyc_str(cc0),
                 cyc_str(cx1), cyc_str(cc1));
    end
    $display("  %0d faults, %0d detected, %0d only at the pin; mean first detection: pin or memory pins %0.1f, memory pins alone %0.1f",
             st_n, st_det, st_xor_only,
             (st_n_any == 0) ? 0.0 : real'(st_sum_any) / st_n_any,
             (st_n_cpu == 0) ? 0.0 : real'(st_sum_cpu) / st_n_cpu);
  endtask

  initial begin
    rst = 1'b1;
    gen_multiply();
    campaign("multiply", 200, 0, NCTRL);
    gen_alu();
    campaign("ALU", 200, 0, NCTRL);
    gen_multiply();
    campaign("multiply, datapath faults", 200, NCTRL, NSIG);
    gen_random(150, 5);
    campaign("random", 500, 0, NSIG);
    campaign("random, decoder outputs only", 500, 0, 18);
    $display("runs %0d: caught by the pin only %0d, by memory pins only %0d, by both %0d (pin first or same cycle %0d); single-bit cycles %0d",
             n_runs, n_xor_only, n_cpu_only, n_both, n_xor_first, n_single);
    checks++;
    if (n_xor_only == 0) begin
      failures++;
      $display("FAIL no fault was seen only at the observation pin");
    end
    checks++;
    if (n_single == 0) begin
      failures++;
      $display("FAIL no single-bit difference occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
