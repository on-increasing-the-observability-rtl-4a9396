// sram_model: behavioural model of one SRAM array of the JAM board, eight
// 512K x 8 chips side by side forming 2^AW lines of 64 bits.
// Chip i holds byte i of every line. A chip drives its byte when its chip
// select and the shared output enable are low (asynchronous read, no access
// delay); otherwise its byte reads as zero. A chip whose select and the
// shared write enable are low stores its byte of wdata on the rising clock
// edge (the write is synchronised to the clock for simulation). The array
// can be loaded and inspected through load_word/peek_word, addressed in
// 32-bit words (line = word >> 1, half = word[0]).
module sram_model #(
  parameter int unsigned AW = 19
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    cs_n,
  input  logic          oe_n,
  input  logic          we_n,
  input  logic [63:0]   wdata,
  output logic [63:0]   rdata
);
  logic [63:0] mem [2**AW];

  always_comb begin
    for (int i = 0; i < 8; i++)
      rdata[8*i +: 8] = (!cs_n[i] && !oe_n) ? mem[addr][8*i +: 8] : 8'h00;
  end

  always_ff @(posedge clk) begin
    if (!we_n) begin
      for (int i = 0; i < 8; i++)
        if (!cs_n[i]) mem[addr][8*i +: 8] <= wdata[8*i +: 8];
    end
  end

  task automatic load_word(input int unsigned waddr, input logic [31:0] data);
    if (waddr[0]) mem[AW'(waddr >> 1)][63:32] = data;
    else          mem[AW'(waddr >> 1)][31:0]  = data;
  endtask

  function automatic logic [31:0] peek_word(input int unsigned waddr);
    return waddr[0] ? mem[AW'(waddr >> 1)][63:32] : mem[AW'(waddr >> 1)][31:0];
  endfunction
endmodule
