// ham_string: one string of the HAM-PATH oracle, assembled as path number
// PATH of the fully connected directed graph on NODES nodes (the PATH-th
// permutation of the nodes in lexicographic order, see
// oracle_pkg::perm_node). The string is NODES-1 edge tiles long; tile i stands
// for the edge from the i-th to the (i+1)-th node of the path. Because a node
// is taken out of the set of free nodes once it is used, every string visits
// each node exactly once.
//
// Run time: `edges` (bit u*NODES+v = edge u->v exists in the problem graph)
// reaches every tile. The input enable `ie` passes down the string and each
// tile interrupts it when its edge is absent (ie_out = ie_in & edge); at the
// bottom it is reflected as the output enable, which is `hit`. `hit` is
// combinational: high iff `ie` is high and the path uses only existing edges.
module ham_string
  import oracle_pkg::*;
#(
  parameter int unsigned NODES = 7,
  parameter int unsigned PATH  = 0
) (
  input  logic [NODES*NODES-1:0] edges,
  input  logic                   ie,
  output logic                   hit
);
  logic [NODES-1:0] ie_c;
  assign ie_c[0] = ie;

  for (genvar i = 0; i < NODES - 1; i++) begin : g_tile
    localparam int unsigned U = perm_node(NODES, PATH, i);
    localparam int unsigned V = perm_node(NODES, PATH, i + 1);
    assign ie_c[i+1] = ie_c[i] & edges[U*NODES+V];
  end

  assign hit = ie_c[NODES-1];   // output enable reflected from the bottom
endmodule
