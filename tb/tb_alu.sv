// tb_alu: random and boundary operands for every ALU operation, compared
// with results and flags computed in 64-bit integer arithmetic.
module tb_alu;
  import jam_pkg::*;
  logic [31:0] a, b, y;
  alu_op_e     op;
  logic        n, z, c, v;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .op, .y, .n, .z, .c, .v);

  function automatic logic [31:0] shref(logic [31:0] x, logic [5:0] s, bit arith);
    int k;
    longint xs;
    k = (s >= 6'd32) ? int'(s) - 64 : int'(s);
    xs = arith ? longint'($signed(x)) : longint'(x);
    if (k >= 0) return 32'(xs * (longint'(1) << k));
    return 32'(xs >>> (-k));
  endfunction

  initial begin
    logic [31:0] ey;
    logic        ec, ev;
    longint      sa, sb, r;
    for (int t = 0; t < 8000; t++) begin
      case (t % 50)
        0: begin a = 32'h8000_0000; b = 32'h0000_0001; end
        1: begin a = 32'h7FFF_FFFF; b = 32'h0000_0001; end
        2: begin a = 32'h0; b = 32'h0; end
        3: begin a = 32'hFFFF_FFFF; b = 32'h0000_0020; end
        default: begin a = $urandom; b = $urandom; end
      endcase
      op = alu_op_e'(t % 8);
      sa = longint'($signed(a));
      sb = longint'($signed(b));
      ec = 1'b0; ev = 1'b0;
      case (t % 8)
        0: begin
          ey = a + b;
          ec = ((longint'(a) + longint'(b)) >> 32) != 0;
          r = sa + sb; ev = (r > 64'sd2147483647) || (r < -64'sd2147483648);
        end
        1: begin
          ey = a - b;
          ec = (a >= b);
          r = sa - sb; ev = (r > 64'sd2147483647) || (r < -64'sd2147483648);
        end
        2: ey = a & b;
        3: ey = a | b;
        4: ey = a ^ b;
        5: ey = shref(a, b[5:0], 1'b1);
        6: ey = shref(a, b[5:0], 1'b0);
        default: ey = b;
      endcase
      #1;
      checks++;
      if (y !== ey || n !== ey[31] || z !== (ey == 0) || c !== ec || v !== ev) begin
        failures++;
        if (failures < 10)
          $display("FAIL op %0d a %h b %h: y %h nzcv %b%b%b%b, expected %h c%b v%b",
                   t % 8, a, b, y, n, z, c, v, ey, ec, ev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
