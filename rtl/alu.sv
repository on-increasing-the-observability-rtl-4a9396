// alu: the JAM arithmetic and logic unit.
//
// Performs ADD, SUB, AND, OR, XOR, two shifts and a pass of operand B, and
// produces the flags N, Z, C, V. It is shared by ordinary instructions and by
// the iterations of the Booth multiplier in the integer unit.
// Shifts: b[5:0] is a signed shift amount; a positive amount shifts left,
// a negative amount -k shifts right by k (1..32), SHS filling with the sign bit and SHZ with
// zeros. The published text names SHS and SHZ without defining them; the
// signed-amount reading is this design's own. C is the carry out of ADD and
// "no borrow" for SUB; V is signed overflow of ADD/SUB; both are 0 otherwise.
// Purely combinational.
module alu
  import jam_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_op_e     op,
  output logic [31:0] y,
  output logic        n,
  output logic        z,
  output logic        c,
  output logic        v
);
  logic [32:0] sum;
  logic [5:0]  amt;
  logic [5:0]  mag;

  always_comb begin
    amt = b[5:0];
    mag = amt[5] ? 6'(-amt) : amt;
    sum = '0;
    c   = 1'b0;
    v   = 1'b0;
    unique case (op)
      ALU_ADD: begin
        sum = {1'b0, a} + {1'b0, b};
        y   = sum[31:0];
        c   = sum[32];
        v   = (a[31] == b[31]) && (y[31] != a[31]);
      end
      ALU_SUB: begin
        sum = {1'b0, a} + {1'b0, ~b} + 33'd1;
        y   = sum[31:0];
        c   = sum[32];
        v   = (a[31] != b[31]) && (y[31] != a[31]);
      end
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_SHS: y = amt[5] ? 32'($signed(a) >>> mag) : a << mag;
      ALU_SHZ: y = amt[5] ? a >> mag : a << mag;
      default: y = b;
    endcase
    n = y[31];
    z = (y == '0);
  end
endmodule
