// adder_tree: balanced, registered sum of N unsigned operands.
//
// The products of the EP processing elements of a kernel are summed by a
// small balanced tree before they reach the accumulator. The operands are
// padded with zeros to P = 2^ceil(log2 N) leaves and summed as a complete
// binary tree stored in heap order (node i adds its children 2i+1 and 2i+2;
// indices from P-1 on are the leaves). Every adder node is registered, so
// the latency is log2(P) cycles (0 for N = 1, where the input passes straight
// through) and a new set of operands is accepted every cycle. All nodes use
// the full output width, so no sum can overflow.
module adder_tree #(
  parameter int unsigned N  = 16,
  parameter int unsigned IW = 16,
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0,
  localparam int unsigned OW = IW + LEVELS
) (
  input  logic                 clk,
  input  logic [N-1:0][IW-1:0] in,
  output logic [OW-1:0]        sum
);

  if (N == 1) begin : g_leaf
    assign sum = OW'(in[0]);
    logic unused_clk;
    assign unused_clk = clk;
  end else begin : g_tree
    localparam int unsigned P = 1 << LEVELS;

    logic [OW-1:0] leaf [P];
    logic [OW-1:0] node [P-1];

    for (genvar i = 0; i < P; i++) begin : g_pad
      if (i < N) begin : g_in
        assign leaf[i] = OW'(in[i]);
      end else begin : g_zero
        assign leaf[i] = '0;
      end
    end

    for (genvar i = 0; i < P - 1; i++) begin : g_node
      logic [OW-1:0] a, b;
      if (2 * i + 1 >= P - 1) begin : g_from_leaves
        assign a = leaf[2 * i + 1 - (P - 1)];
        assign b = leaf[2 * i + 2 - (P - 1)];
      end else begin : g_from_nodes
        assign a = node[2 * i + 1];
        assign b = node[2 * i + 2];
      end
      always_ff @(posedge clk) node[i] <= a + b;
    end

    assign sum = node[0];
  end

endmodule
