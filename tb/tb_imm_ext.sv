// tb_imm_ext: checks the four immediate formats against integer arithmetic:
// sign extension, imm * 65536 and imm * 4 (sign extended), over random and
// boundary immediates.
module tb_imm_ext;
  import jam_pkg::*;
  logic [15:0] imm;
  imm_mode_e   mode;
  logic [31:0] ext;
  int checks = 0, failures = 0;

  imm_ext dut (.imm, .mode, .ext);

  function automatic logic [31:0] expect_of(logic [15:0] i, logic [1:0] m);
    int s;
    s = (i >= 16'h8000) ? int'(i) - 65536 : int'(i);
    case (m)
      2'b10:   return 32'(int'(i) * 65536);
      2'b11:   return 32'(s * 4);
      default: return 32'(s);
    endcase
  endfunction

  initial begin
    for (int t = 0; t < 2000; t++) begin
      case (t)
        0: imm = 16'h0000;
        1: imm = 16'hFFFF;
        2: imm = 16'h8000;
        3: imm = 16'h7FFF;
        default: imm = 16'($urandom);
      endcase
      mode = imm_mode_e'(t % 4);
      #1;
      checks++;
      if (ext !== expect_of(imm, 2'(t % 4))) begin
        failures++;
        if (failures < 10) $display("FAIL imm %h mode %0d: %h", imm, t % 4, ext);
      end
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
