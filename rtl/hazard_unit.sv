// hazard_unit: stall detection for the JAM pipeline.
//
// Three stalls, as in the published design:
//   stall_lw     : load-use. The instruction in ID reads a register that the
//                  load now in EX will write; ID waits one cycle, after which
//                  the loaded word is forwarded from MEM/WB.
//   stall_branch : a branch in ID (where it is resolved) needs a value that
//                  is not yet available: it is being computed in EX, or it
//                  is being loaded by a load in MEM.
//   stall_store  : every store holds the pipeline for one cycle in MEM (first
//                  cycle: address and data settle, second cycle: write).
// The multiply stall comes from the integer unit. The stall conditions are
// this design's reading of the published rules. Purely combinational.
module hazard_unit (
  input  logic       id_valid,
  input  logic       id_use_a,
  input  logic       id_use_b,
  input  logic       id_branch,
  input  logic [4:0] id_ra,
  input  logic [4:0] id_rb,
  input  logic       idex_valid,
  input  logic       idex_we,
  input  logic       idex_load,
  input  logic [4:0] idex_rd,
  input  logic       exmem_valid,
  input  logic       exmem_we,
  input  logic       exmem_load,
  input  logic       exmem_store,
  input  logic [4:0] exmem_rd,
  input  logic       sw_phase,     // the store in MEM is in its write cycle
  output logic       stall_lw,
  output logic       stall_branch,
  output logic       stall_store
);
  logic dep_ex, dep_mem;

  always_comb begin
    dep_ex  = idex_valid && idex_we && idex_rd != '0 &&
              ((id_use_a && id_ra == idex_rd) || (id_use_b && id_rb == idex_rd));
    dep_mem = exmem_valid && exmem_we && exmem_load && exmem_rd != '0 &&
              ((id_use_a && id_ra == exmem_rd) || (id_use_b && id_rb == exmem_rd));
    stall_branch = id_valid && id_branch && (dep_ex || dep_mem);
    stall_lw     = id_valid && !id_branch && dep_ex && idex_load;
    stall_store  = exmem_valid && exmem_store && !sw_phase;
  end
endmodule
