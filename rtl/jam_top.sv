// jam_top: JAM processor with its two memory access units and the XOR
// observation output.
//
// The pipeline (jam_core) talks to a split memory: an instruction array and
// a data array, each 512K lines x 64 bits made of eight 512K x 8 SRAM chips
// that sit outside this module. One memory access unit (mau) per array
// converts the 32-bit word address and data of the pipeline into the 19-bit
// line address, eight chip selects and output/write enables of the chips.
// The instruction side only reads.
// Observation: 87 control bits from all pipeline stages (50 signals, see
// jam_pkg::obs_t) are reduced by a 7-level XOR tree to the single pin
// `obs_out`. A single wrong bit among the monitored signals flips obs_out in
// the same cycle, so comparing it against a known-good reference (a golden
// model or a second device) exposes control errors without stopping the
// processor. obs_out is combinational from the monitored signals; sample it
// before the rising clock edge. The split memory, the 64-bit lines, the
// chip organisation and the single-bit XOR tree over 50 signals / 87 bits
// follow the published design; the signal-to-bit assignment is this
// design's own.
module jam_top
  import jam_pkg::*;
#(
  parameter int unsigned LINE_AW = 19
) (
  input  logic               clk,
  input  logic               rst,
  // instruction SRAM array
  output logic [LINE_AW-1:0] imem_sram_addr,
  output logic [7:0]         imem_sram_cs_n,
  output logic               imem_sram_oe_n,
  output logic               imem_sram_we_n,
  output logic [63:0]        imem_sram_wdata,
  input  logic [63:0]        imem_sram_rdata,
  // data SRAM array
  output logic [LINE_AW-1:0] dmem_sram_addr,
  output logic [7:0]         dmem_sram_cs_n,
  output logic               dmem_sram_oe_n,
  output logic               dmem_sram_we_n,
  output logic [63:0]        dmem_sram_wdata,
  input  logic [63:0]        dmem_sram_rdata,
  // observation pin
  output logic               obs_out
);
  logic [31:0] imem_addr, imem_rdata;
  logic        imem_read;
  logic [31:0] dmem_addr, dmem_wdata, dmem_rdata;
  logic        dmem_read, dmem_write;
  obs_t        obs;

  jam_core u_core (
    .clk, .rst,
    .imem_addr, .imem_read, .imem_rdata,
    .dmem_addr, .dmem_wdata, .dmem_read, .dmem_write, .dmem_rdata,
    .obs
  );

  mau #(.LINE_AW(LINE_AW)) u_imau (
    .reset(rst), .addr(imem_addr), .wdata(32'h0), .rdata(imem_rdata),
    .read(imem_read), .write(1'b0),
    .sram_addr(imem_sram_addr), .sram_cs_n(imem_sram_cs_n),
    .sram_oe_n(imem_sram_oe_n), .sram_we_n(imem_sram_we_n),
    .sram_wdata(imem_sram_wdata), .sram_rdata(imem_sram_rdata)
  );

  mau #(.LINE_AW(LINE_AW)) u_dmau (
    .reset(rst), .addr(dmem_addr), .wdata(dmem_wdata), .rdata(dmem_rdata),
    .read(dmem_read), .write(dmem_write),
    .sram_addr(dmem_sram_addr), .sram_cs_n(dmem_sram_cs_n),
    .sram_oe_n(dmem_sram_oe_n), .sram_we_n(dmem_sram_we_n),
    .sram_wdata(dmem_sram_wdata), .sram_rdata(dmem_sram_rdata)
  );

  xor_tree #(.N(OBS_BITS)) u_obs (.in(obs), .out(obs_out));
endmodule
