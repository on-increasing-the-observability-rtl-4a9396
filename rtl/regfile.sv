// regfile: the JAM register file, NREGS x XLEN bits (32 x 32).
//
// Two combinational read ports (A and B) and one write port clocked on the
// rising edge. R0 always reads as zero and ignores writes; every other
// register holds any 32-bit value. A read of the register being written in
// the same cycle returns the new value (write-through), so the write-back
// stage needs no separate forwarding path into decode; this bypass is this
// design's own choice. Registers are cleared by the synchronous reset.
module regfile
  import jam_pkg::*;
#(
  parameter int unsigned N = NREGS,
  parameter int unsigned W = XLEN
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [$clog2(N)-1:0] ra,
  output logic [W-1:0]         rdata_a,
  input  logic [$clog2(N)-1:0] rb,
  output logic [W-1:0]         rdata_b,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] rw,
  input  logic [W-1:0]         wdata
);
  logic [W-1:0] regs [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(N); i++) regs[i] <= '0;
    end else if (we && rw != '0) begin
      regs[rw] <= wdata;
    end
  end

  function automatic logic [W-1:0] rd_port(logic [$clog2(N)-1:0] a);
    if (a == '0)                return '0;
    else if (we && rw == a)     return wdata;
    else                        return regs[a];
  endfunction

  assign rdata_a = rd_port(ra);
  assign rdata_b = rd_port(rb);
endmodule
