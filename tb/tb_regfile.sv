// tb_regfile: random writes and reads on both ports against a model array.
// Checks R0 stays zero, written values are returned, a same-cycle read of
// the register being written returns the new value, and reset clears all.
module tb_regfile;
  logic        clk = 1'b0, rst = 1'b1;
  logic [4:0]  ra, rb, rw;
  logic [31:0] rda, rdb, wdata;
  logic        we;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile dut (.clk, .rst, .ra, .rdata_a(rda), .rb, .rdata_b(rdb), .we, .rw, .wdata);

  always #5 clk = ~clk;

  function automatic logic [31:0] expv(logic [4:0] r);
    if (r == 0) return 32'h0;
    if (we && rw == r) return wdata;
    return model[r];
  endfunction

  initial begin
    we = 1'b0; ra = '0; rb = '0; rw = '0; wdata = '0;
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      we    = 1'($urandom);
      rw    = 5'($urandom);
      wdata = $urandom;
      ra    = (t % 7 == 0) ? rw : 5'($urandom);
      rb    = (t % 11 == 0) ? 5'd0 : 5'($urandom);
      #1;
      checks += 2;
      if (rda !== expv(ra)) begin
        failures++;
        if (failures < 10) $display("FAIL port A r%0d: %h vs %h", ra, rda, expv(ra));
      end
      if (rdb !== expv(rb)) begin
        failures++;
        if (failures < 10) $display("FAIL port B r%0d: %h vs %h", rb, rdb, expv(rb));
      end
      @(posedge clk);
      if (we && rw != 0) model[rw] = wdata;
      #1;
    end
    we = 1'b0;
    rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    for (int r = 0; r < 32; r++) begin
      ra = 5'(r);
      #1;
      checks++;
      if (rda !== 32'h0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
