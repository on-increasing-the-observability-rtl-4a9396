// xor_tree: the observation circuit.
//
// Compresses N monitored signals into one output bit with a balanced tree of
// 2-input XOR gates, so that an error on any single monitored bit flips the
// output (multiple simultaneous errors may cancel). With the default of 87
// inputs the tree has ceil(log2 87) = 7 levels, the depth given for the
// original circuit; a 7-level tree could take up to 128 inputs without extra
// delay. Level k pairs the outputs of level k-1; an odd element is carried
// up unchanged, so exactly N-1 gates are used (86 for 87 inputs).
// Purely combinational: the output follows the inputs after the tree delay.
module xor_tree #(
  parameter int unsigned N = 87
) (
  input  logic [N-1:0] in,
  output logic         out
);
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;

  // width of level k: ceil(N / 2^k)
  function automatic int unsigned lw(int unsigned k);
    return (N + (1 << k) - 1) >> k;
  endfunction

  logic [N-1:0] lvl [LEVELS+1];

  assign lvl[0] = in;

  for (genvar k = 1; k <= LEVELS; k++) begin : g_level
    localparam int unsigned WI = lw(k - 1);
    localparam int unsigned WO = lw(k);
    for (genvar i = 0; i < WO; i++) begin : g_node
      if (2 * i + 1 < WI) begin : g_gate
        assign lvl[k][i] = lvl[k-1][2*i] ^ lvl[k-1][2*i+1];
      end else begin : g_pass
        assign lvl[k][i] = lvl[k-1][2*i];
      end
    end
    if (WO < N) begin : g_pad
      assign lvl[k][N-1:WO] = '0;
    end
  end

  assign out = lvl[LEVELS][0];
endmodule
