// tb_forwarding_unit: random pipeline situations compared with a reference
// priority rule (EX/MEM result first, then MEM/WB, never for R0, never from
// a load still in MEM), plus directed cases for each source.
module tb_forwarding_unit;
  import jam_pkg::*;
  logic [4:0] ex_ra, ex_rb, id_ra, id_rb, exmem_rd, memwb_rd;
  logic       exmem_valid, exmem_we, exmem_res_valid, memwb_valid, memwb_we;
  fwd_sel_e   fwd_ex_a, fwd_ex_b, fwd_id_a, fwd_id_b;
  int checks = 0, failures = 0;

  forwarding_unit dut (.*);

  function automatic fwd_sel_e model(logic [4:0] r);
    bit em, mw;
    em = exmem_valid && exmem_we && exmem_res_valid && (exmem_rd == r) && (r != 0);
    mw = memwb_valid && memwb_we && (memwb_rd == r) && (r != 0);
    return em ? FWD_EXMEM : (mw ? FWD_MEMWB : FWD_NONE);
  endfunction

  initial begin
    automatic int seen [3] = '{0, 0, 0};
    for (int t = 0; t < 5000; t++) begin
      exmem_rd = 5'($urandom_range(0, 3));
      memwb_rd = 5'($urandom_range(0, 3));
      ex_ra = 5'($urandom_range(0, 3)); ex_rb = 5'($urandom_range(0, 3));
      id_ra = 5'($urandom_range(0, 3)); id_rb = 5'($urandom_range(0, 3));
      {exmem_valid, exmem_we, exmem_res_valid, memwb_valid, memwb_we} = 5'($urandom) | 5'b10010;
      #1;
      checks += 4;
      if (fwd_ex_a !== model(ex_ra)) failures++;
      if (fwd_ex_b !== model(ex_rb)) failures++;
      if (fwd_id_a !== model(id_ra)) failures++;
      if (fwd_id_b !== model(id_rb)) failures++;
      seen[int'(fwd_ex_a)]++;
    end
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0) failures++;
    // both producers write r5: the younger (EX/MEM) wins
    {exmem_valid, exmem_we, exmem_res_valid, memwb_valid, memwb_we} = 5'b11111;
    exmem_rd = 5'd5; memwb_rd = 5'd5; ex_ra = 5'd5; ex_rb = 5'd0; id_ra = 5'd5; id_rb = 5'd6;
    #1;
    checks++;
    if (!(fwd_ex_a == FWD_EXMEM && fwd_ex_b == FWD_NONE && fwd_id_a == FWD_EXMEM && fwd_id_b == FWD_NONE))
      failures++;
    // a load in MEM is not forwarded, the older value in MEM/WB is
    exmem_res_valid = 1'b0;
    #1;
    checks++;
    if (fwd_ex_a != FWD_MEMWB) failures++;
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
