// tb_hazard_unit: random pipeline situations compared with the stall rules:
// load-use (load in EX feeding a non-branch in ID), branch (branch in ID
// needing a value computed in EX or loaded in MEM) and store (a store in MEM
// in its first cycle), plus directed cases.
module tb_hazard_unit;
  logic       id_valid, id_use_a, id_use_b, id_branch;
  logic [4:0] id_ra, id_rb, idex_rd, exmem_rd;
  logic       idex_valid, idex_we, idex_load;
  logic       exmem_valid, exmem_we, exmem_load, exmem_store, sw_phase;
  logic       stall_lw, stall_branch, stall_store;
  int checks = 0, failures = 0;

  hazard_unit dut (.*);

  function automatic bit uses(logic [4:0] r);
    return r != 0 && ((id_use_a && id_ra == r) || (id_use_b && id_rb == r));
  endfunction

  initial begin
    bit e_lw, e_br, e_st;
    automatic int n_lw = 0, n_br = 0, n_st = 0;
    for (int t = 0; t < 8000; t++) begin
      {id_valid, id_use_a, id_use_b, id_branch} = 4'($urandom) | 4'b1000;
      {idex_valid, idex_we, idex_load} = 3'($urandom);
      {exmem_valid, exmem_we, exmem_load, exmem_store, sw_phase} = 5'($urandom);
      id_ra = 5'($urandom_range(0, 3)); id_rb = 5'($urandom_range(0, 3));
      idex_rd = 5'($urandom_range(0, 3)); exmem_rd = 5'($urandom_range(0, 3));
      #1;
      e_lw = id_valid && !id_branch && idex_valid && idex_we && idex_load && uses(idex_rd);
      e_br = id_valid && id_branch && ((idex_valid && idex_we && uses(idex_rd)) ||
                                       (exmem_valid && exmem_we && exmem_load && uses(exmem_rd)));
      e_st = exmem_valid && exmem_store && !sw_phase;
      checks += 3;
      if (stall_lw !== e_lw) failures++;
      if (stall_branch !== e_br) failures++;
      if (stall_store !== e_st) failures++;
      n_lw += int'(e_lw); n_br += int'(e_br); n_st += int'(e_st);
    end
    checks++;
    if (n_lw == 0 || n_br == 0 || n_st == 0) failures++;
    // ADD after LW of its second operand
    {id_valid, id_use_a, id_use_b, id_branch} = 4'b1110;
    id_ra = 5'd1; id_rb = 5'd2;
    {idex_valid, idex_we, idex_load} = 3'b111; idex_rd = 5'd2;
    {exmem_valid, exmem_we, exmem_load, exmem_store, sw_phase} = 5'b0;
    exmem_rd = 5'd0;
    #1;
    checks++;
    if (!(stall_lw && !stall_branch && !stall_store)) failures++;
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
