// tb_mau: checks the memory access unit mapping with a small SRAM array
// model behind it: line address = addr[19:1], reads select all chips and
// return the half named by addr[0], writes select only the four chips of
// that half, reset and idle deselect everything. A sequence of random word
// writes and reads through the unit is compared with a word array.
module tb_mau;
  logic        clk = 1'b0;
  logic        reset, read, write;
  logic [31:0] addr, wdata, rdata;
  logic [18:0] sa;
  logic [7:0]  cs_n;
  logic        oe_n, we_n;
  logic [63:0] swd, srd;
  logic [31:0] model [1024];
  int checks = 0, failures = 0;

  mau dut (.reset, .addr, .wdata, .rdata, .read, .write,
           .sram_addr(sa), .sram_cs_n(cs_n), .sram_oe_n(oe_n), .sram_we_n(we_n),
           .sram_wdata(swd), .sram_rdata(srd));

  sram_model #(.AW(19)) u_sram (.clk, .addr(sa), .cs_n, .oe_n, .we_n, .wdata(swd), .rdata(srd));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  initial begin
    int unsigned w;
    reset = 1'b1; read = 1'b1; write = 1'b1; addr = 32'h5; wdata = '0;
    #1;
    check(cs_n == 8'hFF && oe_n && we_n, "reset must deselect the chips");
    reset = 1'b0; read = 1'b0; write = 1'b0;
    #1;
    check(cs_n == 8'hFF && oe_n && we_n, "idle must deselect the chips");
    addr = 32'h000A_BCDF; read = 1'b1;
    #1;
    check(sa == 19'h55E6F && cs_n == 8'h00 && !oe_n && we_n, "read mapping");
    read = 1'b0; write = 1'b1; wdata = 32'hCAFE_F00D;
    #1;
    check(cs_n == 8'h0F && oe_n && !we_n && swd == 64'hCAFE_F00D_CAFE_F00D, "write upper half");
    addr = 32'h0000_0010;
    #1;
    check(cs_n == 8'hF0 && sa == 19'h8, "write lower half");
    write = 1'b0;
    for (int i = 0; i < 1024; i++) begin
      model[i] = $urandom;
      u_sram.load_word(i, model[i]);
    end
    for (int t = 0; t < 2000; t++) begin
      w = $urandom_range(0, 1023);
      addr = w;
      if ($urandom_range(0, 1) != 0) begin
        write = 1'b1; read = 1'b0; wdata = $urandom;
        @(posedge clk);
        model[w] = wdata;
        #1 write = 1'b0;
      end else begin
        read = 1'b1; write = 1'b0;
        #1;
        check(rdata == model[w], $sformatf("read word %0d: %h vs %h", w, rdata, model[w]));
        read = 1'b0;
      end
    end
    for (int i = 0; i < 1024; i++)
      check(u_sram.peek_word(i) == model[i], $sformatf("word %0d after writes", i));
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
