// address_subnet: the SYMNET optical address sub-network (document, Section 2,
// Figures 1 and 2).
//
// N_LEAF endpoints hang off a binary tree of bi-directional Y-couplers/
// splitters. A request entering at a leaf climbs the up-stream couplers to the
// root, turns round and is broadcast down the splitters, so that it reaches
// every endpoint in the same cycle: the broadcast is the global order of
// requests. Because every hop is one cycle and requests from different
// processors enter in different token slots, several requests are in flight
// on the same tree at once (address pipelining).
//
// The lower levels of the tree are the intra-board interconnection of a board
// of processors and the upper levels the inter-board interconnection; with
// every node a 2:1 coupler and every hop one cycle, the two levels of the
// hierarchy are electrically the same tree, built here as one heap-indexed
// array of nodes (node 1 is the root, node k feeds nodes 2k and 2k+1, leaf i
// is link N_LEAF+i).
//
// Timing: a word driven on leaf_in[i] in cycle t appears on every leaf_out[j]
// and on mem_out in cycle t + 2*log2(N_LEAF) - 1, i.e. the 2*log2(N_LEAF)-th
// cycle counting the insertion cycle as the first. For four endpoints this
// is Figure 2's "inserted in cycle 1, reaches all processors in cycle 4". The
// memory module listens on a copy of the broadcast (a further splitter
// output); it never inserts requests, since it takes no part in the token ring.
module address_subnet
  import symnet_pkg::*;
#(
  parameter int unsigned N_LEAF = 32   // power of two, >= 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  link_t leaf_in  [N_LEAF],
  output link_t leaf_out [N_LEAF],
  output link_t mem_out
);
  link_t up [2*N_LEAF];   // link from node/leaf k towards its parent
  link_t dn [2*N_LEAF];   // link from the parent of k down to k

  assign up[0] = '0;
  assign dn[0] = '0;
  assign dn[1] = '0;

  for (genvar i = 0; i < N_LEAF; i++) begin : g_leaf
    assign up[N_LEAF + i] = leaf_in[i];
    assign leaf_out[i]    = dn[N_LEAF + i];
  end

  for (genvar k = 1; k < N_LEAF; k++) begin : g_node
    if (k == 1) begin : g_root
      y_coupler_splitter #(.IS_ROOT(1'b1)) u_node (
        .clk(clk), .rst_n(rst_n),
        .up_a(up[2]), .up_b(up[3]), .up_out(up[1]),
        .dn_in('0), .dn_a(dn[2]), .dn_b(dn[3])
      );
    end else begin : g_inner
      y_coupler_splitter #(.IS_ROOT(1'b0)) u_node (
        .clk(clk), .rst_n(rst_n),
        .up_a(up[2*k]), .up_b(up[2*k+1]), .up_out(up[k]),
        .dn_in(dn[k]), .dn_a(dn[2*k]), .dn_b(dn[2*k+1])
      );
    end
  end

  assign mem_out = dn[N_LEAF];
endmodule
