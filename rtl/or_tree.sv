// or_tree: DC-to-1 bitwise OR tree over W-bit vectors.
//
// ORs the one-hot magnitude vectors of all DC check node inputs. Bit k of
// the result is set exactly when at least one input has magnitude k, so
// the positions of the two least significant ones of the result are the two
// smallest distinct magnitudes. The tree is balanced: the DC leaves are
// padded with zero vectors to the next power of two and combined pairwise,
// log2 levels deep. Purely combinational.
//
// Ports: in_vec[DC] (W bits each) in, or_out (W bits) out.
module or_tree #(
  parameter int unsigned W  = 2**cnu_pkg::CNU_Q,
  parameter int unsigned DC = cnu_pkg::CNU_DC
) (
  input  logic [W-1:0] in_vec [DC],
  output logic [W-1:0] or_out
);

  // Number of leaves, rounded up to a power of two.
  localparam int unsigned NP = 2**cnu_pkg::idx_w(DC);

  // Heap-ordered tree: node 0 is the root, node k has children 2k+1, 2k+2,
  // leaves are nodes NP-1 .. 2NP-2.
  logic [W-1:0] node [2*NP-1];

  for (genvar l = 0; l < NP; l++) begin : g_leaf
    if (l < DC) begin : g_used
      assign node[NP-1+l] = in_vec[l];
    end else begin : g_pad
      assign node[NP-1+l] = '0;
    end
  end

  for (genvar k = 0; k < NP-1; k++) begin : g_node
    assign node[k] = node[2*k+1] | node[2*k+2];
  end

  assign or_out = node[0];

endmodule
