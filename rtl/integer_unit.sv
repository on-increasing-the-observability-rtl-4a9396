// integer_unit: the execute-stage engine of JAM.
//
// Holds the ALU, the program status word (PSW) and the multiply sequencer,
// and selects the EX result (ALU output, product word, PSW or link address).
// Multiplication is radix-2 Booth on two signed 32-bit operands and takes 33
// cycles in EX: one setup cycle that loads the multiplicand M, the multiplier
// Q and clears the accumulator A, then 32 iterations. Each iteration adds M
// to, subtracts M from, or keeps A according to {Q[0], q-1} (01 add, 10
// subtract) using the shared ALU, then shifts {A, Q, q-1} right by one;
// the bit shifted into A[31] is the true sign of the 33-bit sum (ALU sign
// XOR overflow). The product word is taken from the combinational result of
// the 32nd iteration, so `finished` is high in the 33rd cycle and the
// instruction leaves EX at the end of it. While a multiply is in EX, `busy`
// asks the pipeline to hold IF, ID and EX. The 33-cycle count, the setup
// cycle, Booth's algorithm and the reuse of the ALU follow the published
// design; the state encoding and the PSW layout ({N,Z,C,V} in bits 3:0)
// are this design's own.
// `hold` freezes everything (a younger stall downstream); `flush` aborts a
// multiply and suppresses the PSW write of the instruction in EX.
module integer_unit
  import jam_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        valid,     // an instruction is in EX
  input  logic        hold,
  input  logic        flush,
  input  ctrl_t       ctrl,
  input  logic [31:0] a,         // operand A (rs1, forwarded)
  input  logic [31:0] b,         // second operand (register or immediate)
  input  logic [31:0] link,      // PC of the instruction + 4
  output logic [31:0] result,    // value for the register file
  output logic [31:0] alu_y,     // ALU output (memory address, jump target)
  output logic        busy,      // multiply not finished: stall
  output logic        finished,  // multiply finishes this cycle
  output logic [31:0] psw,
  output iu_state_e   state
);
  logic [31:0] m_q, acc_q, q_q;
  logic        qm1_q;
  logic [4:0]  cnt_q;

  alu_op_e     alu_op;
  logic [31:0] alu_a, alu_b;
  logic        fn, fz, fc, fv;

  logic        it_addsub;
  logic        it_sign;
  logic [31:0] acc_n, q_n;
  logic        qm1_n;

  alu u_alu (.a(alu_a), .b(alu_b), .op(alu_op), .y(alu_y),
             .n(fn), .z(fz), .c(fc), .v(fv));

  // ALU operand selection: multiply iteration or ordinary instruction
  always_comb begin
    it_addsub = q_q[0] ^ qm1_q;
    if (state == IU_MUL) begin
      alu_a  = acc_q;
      alu_b  = m_q;
      alu_op = (q_q[0] == 1'b0) ? ALU_ADD : ALU_SUB;
    end else begin
      alu_a  = a;
      alu_b  = b;
      alu_op = ctrl.cex_aluop;
    end
  end

  // one Booth iteration
  always_comb begin
    it_sign = it_addsub ? (alu_y[31] ^ fv) : acc_q[31];
    if (it_addsub) begin
      acc_n = {it_sign, alu_y[31:1]};
      q_n   = {alu_y[0], q_q[31:1]};
    end else begin
      acc_n = {it_sign, acc_q[31:1]};
      q_n   = {acc_q[0], q_q[31:1]};
    end
    qm1_n = q_q[0];
  end

  assign finished = (state == IU_MUL) && (cnt_q == 5'd31);
  assign busy     = valid && ctrl.cex_mult && !finished;

  always_comb begin
    unique case (ctrl.cex_regsel)
      RES_ALU:  result = alu_y;
      RES_MUL:  result = ctrl.cex_multop ? acc_n : q_n;
      RES_PSW:  result = psw;
      default:  result = link;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IU_IDLE;
      m_q   <= '0;
      acc_q <= '0;
      q_q   <= '0;
      qm1_q <= 1'b0;
      cnt_q <= '0;
      psw   <= '0;
    end else if (flush) begin
      state <= IU_IDLE;
    end else if (!hold) begin
      unique case (state)
        IU_IDLE: begin
          if (valid && ctrl.cex_mult) begin
            m_q   <= b;
            q_q   <= a;
            acc_q <= '0;
            qm1_q <= 1'b0;
            cnt_q <= '0;
            state <= IU_MUL;
          end else if (valid && ctrl.cex_psw_enable) begin
            unique case (ctrl.cex_pswop)
              PSW_FLAGS: psw <= {psw[31:4], fn, fz, fc, fv};
              PSW_PUT:   psw <= a;
              PSW_SET:   psw <= psw | b;
              default:   psw <= psw & ~b;
            endcase
          end
        end
        default: begin
          acc_q <= acc_n;
          q_q   <= q_n;
          qm1_q <= qm1_n;
          cnt_q <= cnt_q + 5'd1;
          if (cnt_q == 5'd31) state <= IU_IDLE;
        end
      endcase
    end
  end
endmodule
