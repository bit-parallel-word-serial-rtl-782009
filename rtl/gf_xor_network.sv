// gf_xor_network: sums N field elements with a balanced tree of gf_adder
// nodes (the "sub XOR network" M of the partial product generator).
//
// For N = 8 the tree has 4 + 2 + 1 = 7 adders in three levels, so the
// critical path through it is 3 XOR delays. For an N that is not a power
// of two the leaves are padded with zeros up to the next power of two
// (the padded adders reduce to wires after synthesis).
// The nodes are numbered as a heap: node n has children 2n+1 and 2n+2, the
// leaves are nodes P-1 .. 2P-2 and the root, node 0, is the sum.
// Purely combinational.
module gf_xor_network #(
  parameter int unsigned M = gf2m_pkg::GF_M,
  parameter int unsigned N = gf2m_pkg::GF_W
) (
  input  logic [N-1:0][M-1:0] x,
  output logic [M-1:0]        z
);
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;
  localparam int unsigned P      = 1 << LEVELS;   // leaves after padding

  logic [2*P-2:0][M-1:0] node;

  for (genvar l = 0; l < P; l++) begin : g_leaf
    if (l < N) begin : g_in
      assign node[P-1+l] = x[l];
    end else begin : g_pad
      assign node[P-1+l] = '0;
    end
  end

  for (genvar n = 0; n < P - 1; n++) begin : g_node
    gf_adder #(.M(M)) u_add (.a(node[2*n+1]), .b(node[2*n+2]), .c(node[n]));
  end

  assign z = node[0];
endmodule
