// jam_core: the five-stage JAM pipeline (IF, ID, EX, MEM, WB).
//
// IF  fetches the word at PC (byte address, aligned) from the instruction
//     memory access unit; the word address sent out is PC[31:2].
// ID  decodes (control_unit), widens the immediate (imm_ext), reads the
//     register file and resolves BEQ/BNE with a comparator on forwarded
//     values. A taken branch loads PC with PC+4+disp and turns the word
//     already fetched into a bubble (no delay slot).
// EX  runs the integer unit (ALU, PSW, 33-cycle Booth multiply) on operands
//     forwarded from EX/MEM and MEM/WB.
// MEM drives the data memory access unit. A store takes two cycles there
//     (the second asserts the write), holding the rest of the pipeline for
//     one cycle. A JUMP redirects PC from MEM and squashes the three younger
//     instructions.
// WB  writes the register file.
// Stalls: load-use (1 cycle), branch operand not ready, store (1 cycle) and
// multiply (32 extra cycles). The stage structure, the stall sources and
// where branches are resolved follow the published JAM design; jump
// resolution in MEM follows its "mem_jump_trap" signal. Traps and
// interrupts are not implemented (TRAP decodes as a no-op); the forwarding
// paths, the bubble after a taken branch and the reset PC are this design's
// own choices.
// The 87 monitored control bits are gathered into `obs` for the observation
// tree. Memory buses are combinational (asynchronous SRAM): read data must
// arrive in the same cycle as the address.
module jam_core
  import jam_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  // instruction memory side
  output logic [31:0] imem_addr,    // word address
  output logic        imem_read,
  input  logic [31:0] imem_rdata,
  // data memory side
  output logic [31:0] dmem_addr,    // word address
  output logic [31:0] dmem_wdata,
  output logic        dmem_read,
  output logic        dmem_write,
  input  logic [31:0] dmem_rdata,
  // monitored signals
  output obs_t        obs
);
  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] instr;
  } ifid_t;

  typedef struct packed {
    logic        valid;
    ctrl_t       ctrl;
    logic [31:0] link;
    logic [4:0]  ra;
    logic [4:0]  rb;
    logic [4:0]  rd;
    logic [31:0] a_val;
    logic [31:0] b_val;
    logic [31:0] imm;
  } idex_t;

  typedef struct packed {
    logic        valid;
    ctrl_t       ctrl;
    logic [4:0]  rd;
    logic [31:0] res;
    logic [31:0] addr;
    logic [31:0] sdata;
  } exmem_t;

  typedef struct packed {
    logic        valid;
    logic        we;
    logic [4:0]  rd;
    logic [31:0] value;
  } memwb_t;

  logic [31:0] pc_q;
  ifid_t       ifid_q;
  idex_t       idex_q;
  exmem_t      exmem_q;
  memwb_t      memwb_q;
  logic        sw_phase_q;

  // ---------------- ID ----------------
  logic [5:0]  id_op;
  logic [4:0]  id_rd, id_rs1, id_rs2, id_ra, id_rb;
  ctrl_t       id_ctrl;
  logic [31:0] id_imm, rf_a, rf_b, id_a, id_b;
  logic        br_taken, br_eq;
  logic [31:0] br_target;

  assign id_op  = ifid_q.instr[31:26];
  assign id_rd  = ifid_q.instr[25:21];
  assign id_rs1 = ifid_q.instr[20:16];
  assign id_rs2 = ifid_q.instr[15:11];

  control_unit u_ctrl (.opcode(id_op), .ctrl(id_ctrl));

  imm_ext u_imm (.imm(ifid_q.instr[15:0]), .mode(id_ctrl.c_immmode), .ext(id_imm));

  assign id_ra = id_rs1;
  assign id_rb = id_ctrl.cid_bsel ? id_rd : id_rs2;

  regfile u_rf (
    .clk, .rst,
    .ra(id_ra), .rdata_a(rf_a),
    .rb(id_rb), .rdata_b(rf_b),
    .we(memwb_q.valid && memwb_q.we), .rw(memwb_q.rd), .wdata(memwb_q.value)
  );

  // ---------------- forwarding and hazards ----------------
  fwd_sel_e fwd_ex_a, fwd_ex_b, fwd_id_a, fwd_id_b;
  logic     stall_lw, stall_branch, stall_store, stall_mul;
  logic     flush_jump, front_freeze, id_stall;

  forwarding_unit u_fwd (
    .ex_ra(idex_q.ra), .ex_rb(idex_q.rb), .id_ra, .id_rb,
    .exmem_valid(exmem_q.valid), .exmem_we(exmem_q.ctrl.cwb_enable),
    .exmem_res_valid(exmem_q.ctrl.cex_valid_res), .exmem_rd(exmem_q.rd),
    .memwb_valid(memwb_q.valid), .memwb_we(memwb_q.we), .memwb_rd(memwb_q.rd),
    .fwd_ex_a, .fwd_ex_b, .fwd_id_a, .fwd_id_b
  );

  hazard_unit u_haz (
    .id_valid(ifid_q.valid), .id_use_a(id_ctrl.cid_use_a), .id_use_b(id_ctrl.cid_use_b),
    .id_branch(id_ctrl.cid_cmp), .id_ra, .id_rb,
    .idex_valid(idex_q.valid), .idex_we(idex_q.ctrl.cwb_enable),
    .idex_load(idex_q.ctrl.cm_valid_reg), .idex_rd(idex_q.rd),
    .exmem_valid(exmem_q.valid), .exmem_we(exmem_q.ctrl.cwb_enable),
    .exmem_load(exmem_q.ctrl.cm_valid_reg), .exmem_store(exmem_q.ctrl.cm_write),
    .exmem_rd(exmem_q.rd), .sw_phase(sw_phase_q),
    .stall_lw, .stall_branch, .stall_store
  );

  function automatic logic [31:0] fwd_val(fwd_sel_e s, logic [31:0] own,
                                          logic [31:0] exm, logic [31:0] mwb);
    unique case (s)
      FWD_EXMEM: return exm;
      FWD_MEMWB: return mwb;
      default:   return own;
    endcase
  endfunction

  assign id_a = fwd_val(fwd_id_a, rf_a, exmem_q.res, memwb_q.value);
  assign id_b = fwd_val(fwd_id_b, rf_b, exmem_q.res, memwb_q.value);

  assign br_eq     = (id_a == id_b);
  assign br_taken  = ifid_q.valid && id_ctrl.cid_cmp && !stall_branch &&
                     (br_eq == id_ctrl.cid_beq);
  assign br_target = ifid_q.pc + 32'd4 + id_imm;

  // ---------------- EX ----------------
  logic [31:0] ex_a, ex_b, ex_op2, ex_res, ex_alu_y, psw;
  logic        iu_busy, iu_finished;
  iu_state_e   iu_state;

  assign ex_a   = fwd_val(fwd_ex_a, idex_q.a_val, exmem_q.res, memwb_q.value);
  assign ex_b   = fwd_val(fwd_ex_b, idex_q.b_val, exmem_q.res, memwb_q.value);
  assign ex_op2 = idex_q.ctrl.cex_bsel ? idex_q.imm : ex_b;

  assign flush_jump   = exmem_q.valid && exmem_q.ctrl.cm_jump;
  assign stall_mul    = iu_busy;
  assign front_freeze = stall_mul || stall_store;
  assign id_stall     = stall_lw || stall_branch;

  integer_unit u_iu (
    .clk, .rst,
    .valid(idex_q.valid), .hold(stall_store), .flush(flush_jump),
    .ctrl(idex_q.ctrl), .a(ex_a), .b(ex_op2), .link(idex_q.link),
    .result(ex_res), .alu_y(ex_alu_y), .busy(iu_busy), .finished(iu_finished),
    .psw, .state(iu_state)
  );

  // ---------------- MEM ----------------
  logic [31:0] mem_value;

  assign dmem_addr  = {2'b00, exmem_q.addr[31:2]};
  assign dmem_wdata = exmem_q.sdata;
  assign dmem_read  = exmem_q.valid && exmem_q.ctrl.cm_read;
  assign dmem_write = exmem_q.valid && exmem_q.ctrl.cm_write && sw_phase_q;
  assign mem_value  = exmem_q.ctrl.cwb_sel ? dmem_rdata : exmem_q.res;

  // ---------------- IF ----------------
  assign imem_addr = {2'b00, pc_q[31:2]};
  assign imem_read = 1'b1;

  // ---------------- pipeline registers ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      pc_q       <= RESET_PC;
      ifid_q     <= '0;
      idex_q     <= '0;
      exmem_q    <= '0;
      memwb_q    <= '0;
      sw_phase_q <= 1'b0;
    end else begin
      sw_phase_q <= stall_store;

      // PC and IF/ID
      if (flush_jump) begin
        pc_q         <= exmem_q.addr;
        ifid_q.valid <= 1'b0;
      end else if (!(front_freeze || id_stall)) begin
        if (br_taken) begin
          pc_q         <= br_target;
          ifid_q.valid <= 1'b0;
        end else begin
          pc_q   <= pc_q + 32'd4;
          ifid_q <= '{valid: 1'b1, pc: pc_q, instr: imem_rdata};
        end
      end

      // ID/EX
      if (flush_jump) begin
        idex_q <= '0;
      end else if (front_freeze) begin
        // keep the instruction, refresh its operands with forwarded values
        idex_q.a_val <= ex_a;
        idex_q.b_val <= ex_b;
      end else if (id_stall || !ifid_q.valid) begin
        idex_q <= '0;
      end else begin
        idex_q <= '{valid: 1'b1, ctrl: id_ctrl, link: ifid_q.pc + 32'd4,
                    ra: id_ra, rb: id_rb, rd: id_rd,
                    a_val: id_a, b_val: id_b, imm: id_imm};
      end

      // EX/MEM
      if (flush_jump || (stall_mul && !stall_store)) begin
        exmem_q <= '0;
      end else if (!stall_store) begin
        exmem_q <= '{valid: idex_q.valid, ctrl: idex_q.ctrl, rd: idex_q.rd,
                     res: ex_res, addr: ex_alu_y, sdata: ex_b};
      end

      // MEM/WB
      if (stall_store) begin
        memwb_q <= '0;
      end else begin
        memwb_q <= '{valid: exmem_q.valid, we: exmem_q.ctrl.cwb_enable && exmem_q.valid,
                     rd: exmem_q.rd, value: mem_value};
      end
    end
  end

  // ---------------- observed signals ----------------
  always_comb begin
    obs.idex_in          = id_ctrl;
    obs.id_ra            = id_ra;
    obs.id_rb            = id_rb;
    obs.id_rd            = id_rd;
    obs.ex_wb_dest_buf   = idex_q.rd;
    obs.ex_wb_valid_buf  = idex_q.valid;
    obs.exmem_dest       = exmem_q.rd;
    obs.exmem_cm_write   = exmem_q.ctrl.cm_write;
    obs.exmem_cm_read    = exmem_q.ctrl.cm_read;
    obs.exmem_cwb_enable = exmem_q.ctrl.cwb_enable;
    obs.wb_rw            = memwb_q.rd;
    obs.wb_we            = memwb_q.valid && memwb_q.we;
    obs.mem_jump_trap    = flush_jump;
    obs.if_zero          = br_taken && !front_freeze && !id_stall && !flush_jump;
    obs.ex_mc_finished   = iu_finished;
    obs.ex_state         = iu_state;
    obs.stall_lw         = stall_lw;
    obs.stall_branch     = stall_branch;
    obs.stall_mul        = stall_mul;
    obs.stall_store      = stall_store;
    obs.mem_sw_phase     = sw_phase_q;
    obs.fwd_ex_a         = fwd_ex_a;
    obs.fwd_ex_b         = fwd_ex_b;
    obs.fwd_id_a         = fwd_id_a;
    obs.fwd_id_b         = fwd_id_b;
    obs.branch_taken     = br_taken;
    obs.psw_flags        = psw[3:0];
  end
endmodule
