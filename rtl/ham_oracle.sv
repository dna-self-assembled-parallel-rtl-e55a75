// ham_oracle: the Hamiltonian-path oracle. It holds one string for every path
// through the fully connected directed graph on NODES nodes (NODES! strings),
// all formed at assembly time. A problem graph is given at run time as its set
// of edges; each string whose path uses an absent edge is silenced, so some
// string still responds iff the problem graph has a Hamiltonian path.
//
// Interface: the edge set is shifted in serially, one bit per clock with
// `edge_shift`, bit (u*NODES+v) = "edge u->v exists", highest index first;
// after NODES*NODES shifts bit k sits at position k. A one-clock `eval`
// raises the input enable of every string; on that clock edge `hit` (any
// string's output enable) is registered and `valid` pulses one clock.
//
// From the source: one string per path of the complete graph, deletion of
// absent edges at run time, a response iff a Hamiltonian path exists. The
// source designs the tile circuitry elsewhere and does not give it; the
// serial edge register, broadcast edge lines and the registered response are
// this design's own. The source aims at 15 nodes; NODES! strings must each be
// built, so the default is far smaller.
module ham_oracle
  import oracle_pkg::*;
#(
  parameter int unsigned NODES = 7
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   edge_shift,
  input  logic                   edge_in,
  input  logic                   eval,
  output logic                   hit,
  output logic                   valid
);
  localparam int unsigned NE   = NODES * NODES;
  localparam int unsigned NSTR = fact(NODES);

  logic [NE-1:0]   edges;
  logic [NSTR-1:0] str_hit;

  for (genvar p = 0; p < NSTR; p++) begin : g_str
    ham_string #(.NODES(NODES), .PATH(p)) u_str (
      .edges(edges), .ie(eval), .hit(str_hit[p])
    );
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      edges <= '0; hit <= 1'b0; valid <= 1'b0;
    end else begin
      valid <= eval;
      if (edge_shift) edges <= {edges[NE-2:0], edge_in};
      if (eval)       hit   <= |str_hit;
    end
endmodule
