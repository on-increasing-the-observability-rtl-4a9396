// tb_xor_tree: checks the observation tree at its default width (87 inputs).
// Random input vectors are compared with their parity computed bit by bit in
// the testbench, and every single-bit flip of a random vector must flip the
// output.
module tb_xor_tree;
  localparam int unsigned N = 87;
  logic [N-1:0] in;
  logic         out;
  int checks = 0, failures = 0;

  xor_tree dut (.in, .out);

  function automatic logic parity(logic [N-1:0] v);
    logic p = 1'b0;
    for (int i = 0; i < int'(N); i++) p = p ^ v[i];
    return p;
  endfunction

  initial begin
    logic base;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < int'(N); i++) in[i] = 1'($urandom);
      #1;
      checks++;
      if (out !== parity(in)) begin
        failures++;
        $display("FAIL parity of %h: got %b", in, out);
      end
    end
    in = '0;
    #1 base = out;
    checks++;
    if (base !== 1'b0) failures++;
    for (int i = 0; i < int'(N); i++) begin
      for (int j = 0; j < int'(N); j++) in[j] = 1'($urandom);
      #1 base = out;
      in[i] = ~in[i];
      #1;
      checks++;
      if (out === base) begin
        failures++;
        $display("FAIL single flip of bit %0d not seen", i);
      end
    end
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
