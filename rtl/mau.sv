// mau: memory access unit between the JAM pipeline and one SRAM array.
//
// The SRAM array is 512K lines of 64 bits built from eight 512K x 8 chips.
// The pipeline side is a 32-bit word address, 32-bit write and read data and
// the read, write and reset controls. The unit turns them into the 19-bit
// line address, eight chip selects, output enable and write enable:
//   line address = addr[19:1]; addr[0] picks the 32-bit half of the line
//   read : all eight chips selected, the full line is presented and
//          addr[0] selects the half forwarded (0 = bits 31:0, 1 = bits 63:32)
//   write: only the four chips of the half named by addr[0] are selected;
//          the write data is driven on both halves of the line
//   reset, or neither read nor write: no chip selected, OE and WE inactive.
// The address seen here is a word address: the pipeline drops the two low
// byte-address bits, which are always taken as zero (aligned words only).
// Active-low chip controls, and read priority over write if both are
// requested, are this design's own choices. Purely combinational.
module mau #(
  parameter int unsigned LINE_AW = 19,
  parameter int unsigned NCHIPS  = 8
) (
  input  logic                  reset,
  input  logic [31:0]           addr,
  input  logic [31:0]           wdata,
  output logic [31:0]           rdata,
  input  logic                  read,
  input  logic                  write,
  // SRAM side
  output logic [LINE_AW-1:0]    sram_addr,
  output logic [NCHIPS-1:0]     sram_cs_n,
  output logic                  sram_oe_n,
  output logic                  sram_we_n,
  output logic [8*NCHIPS-1:0]   sram_wdata,
  input  logic [8*NCHIPS-1:0]   sram_rdata
);
  localparam int unsigned HALF = NCHIPS / 2;

  logic half;
  assign half       = addr[0];
  assign sram_addr  = addr[LINE_AW:1];
  assign sram_wdata = {2{wdata}};
  assign rdata      = half ? sram_rdata[8*NCHIPS-1 -: 32] : sram_rdata[31:0];

  always_comb begin
    sram_cs_n = '1;
    sram_oe_n = 1'b1;
    sram_we_n = 1'b1;
    if (!reset) begin
      if (read) begin
        sram_cs_n = '0;
        sram_oe_n = 1'b0;
      end else if (write) begin
        sram_we_n = 1'b0;
        sram_cs_n = half ? {{HALF{1'b0}}, {HALF{1'b1}}} : {{HALF{1'b1}}, {HALF{1'b0}}};
      end
    end
  end
endmodule
