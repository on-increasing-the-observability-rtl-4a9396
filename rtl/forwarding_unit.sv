// forwarding_unit: operand bypass selection for the JAM pipeline.
//
// For each register operand read in EX (the instruction held in ID/EX) and
// in ID (the branch comparator), chooses where its newest value is:
//   FWD_EXMEM : the result held in EX/MEM, when that instruction writes the
//               register and its result already exists at the end of EX
//               (not a load)
//   FWD_MEMWB : the write-back value held in MEM/WB
//   FWD_NONE  : the value read from the register file / held in ID/EX.
// The younger producer (EX/MEM) wins. R0 is never forwarded. The published
// design names forwarding logic without describing it; this is the usual
// two-source bypass. Purely combinational.
module forwarding_unit
  import jam_pkg::*;
(
  input  logic [4:0] ex_ra,
  input  logic [4:0] ex_rb,
  input  logic [4:0] id_ra,
  input  logic [4:0] id_rb,
  input  logic       exmem_valid,
  input  logic       exmem_we,
  input  logic       exmem_res_valid,
  input  logic [4:0] exmem_rd,
  input  logic       memwb_valid,
  input  logic       memwb_we,
  input  logic [4:0] memwb_rd,
  output fwd_sel_e   fwd_ex_a,
  output fwd_sel_e   fwd_ex_b,
  output fwd_sel_e   fwd_id_a,
  output fwd_sel_e   fwd_id_b
);
  function automatic fwd_sel_e pick(logic [4:0] r);
    if (r == '0)
      return FWD_NONE;
    else if (exmem_valid && exmem_we && exmem_res_valid && exmem_rd == r)
      return FWD_EXMEM;
    else if (memwb_valid && memwb_we && memwb_rd == r)
      return FWD_MEMWB;
    else
      return FWD_NONE;
  endfunction

  assign fwd_ex_a = pick(ex_ra);
  assign fwd_ex_b = pick(ex_rb);
  assign fwd_id_a = pick(id_ra);
  assign fwd_id_b = pick(id_rb);
endmodule
