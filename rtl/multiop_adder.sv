// multiop_adder: multioperand adder that counts the ones among N_IN single-bit inputs.
//
// It is a balanced tree of two-input adders, as in the source architecture: level 0 holds
// the operands, and node i of level l adds nodes 2i and 2i+1 of level l-1 (an odd node out
// passes through). The depth is ceil(log2(N_IN)) levels and there are N_IN-1 additions. The
// nodes are declared at the full count width; the upper bits of the lower levels are
// constant zero and synthesis removes them, which gives the widening adders of the source
// (one bit wider per level). The synchronizer uses it to turn the Nc constraint results into
// U, the number of unsatisfied constraints. Purely combinational.
module multiop_adder #(
  parameter int unsigned N_IN = 972,                  // number of 1-bit operands
  localparam int unsigned SUM_W = $clog2(N_IN + 1),   // width of the count
  localparam int unsigned LEVELS = $clog2(N_IN)       // depth of the tree
) (
  input  logic [N_IN-1:0]  operands,
  output logic [SUM_W-1:0] sum
);

  // nodes of level l: ceil(N_IN / 2^l)
  function automatic int unsigned width_at(int unsigned l);
    return (N_IN + (1 << l) - 1) >> l;
  endfunction

  for (genvar l = 0; l <= LEVELS; l++) begin : g_level
    logic [SUM_W-1:0] node [width_at(l)];
    for (genvar i = 0; i < width_at(l); i++) begin : g_node
      if (l == 0) begin : g_leaf
        assign node[i] = SUM_W'(operands[i]);
      end else if (2 * i + 1 < width_at(l - 1)) begin : g_add
        assign node[i] = g_level[l - 1].node[2 * i] + g_level[l - 1].node[2 * i + 1];
      end else begin : g_pass
        assign node[i] = g_level[l - 1].node[2 * i];
      end
    end
  end

  assign sum = g_level[LEVELS].node[0];

endmodule
