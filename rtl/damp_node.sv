// damp_node: one DAMP processor node. NPROC processors receive the same
// broadcast control word in parallel and never talk to each other. The node's
// only result is `ring_detect`: high while any of its processors' ringers is
// oscillating.
//
// Detection: the ringer outputs are ORed and sampled over two clocks; a ringer
// that is enabled is high in one of any two consecutive cycles, an idle one is
// always low, so `ring_detect` = OR of the last two samples. Latency: it rises
// two clocks after the edge that sets a processor's R bit and is low again at
// most three clocks after the edge that clears the last one.
//
// From the source: processors grouped into nodes under a common controller,
// broadcast control, ringer detection per node, 2^28 processors per node.
// This design's own choices: the two-sample detector and the random constants
// given to each processor by damp_pkg::rand_const(SEED, NODE_ID, index, reg).
module damp_node
  import damp_pkg::*;
#(
  parameter int unsigned NPROC   = 4,
  parameter int unsigned NODE_ID = 0,
  parameter int unsigned SEED    = 32'h5EED_0001
) (
  input  logic     clk,
  input  logic     rst_n,
  input  pe_ctrl_t ctrl,
  output logic     ring_detect
);

  logic [NPROC-1:0] ring;
  logic             ring_any, samp1, samp2;

  for (genvar p = 0; p < NPROC; p++) begin : g_pe
    damp_pe #(
      .RAND_ACC(rand_const(SEED, NODE_ID, p, 0)),
      .RAND_R0 (rand_const(SEED, NODE_ID, p, 1)),
      .RAND_R1 (rand_const(SEED, NODE_ID, p, 2))
    ) u_pe (
      .clk(clk), .rst_n(rst_n), .ctrl(ctrl), .ring(ring[p]),
      .acc_q(), .status_q()
    );
  end

  assign ring_any = |ring;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      samp1 <= 1'b0;
      samp2 <= 1'b0;
    end else begin
      samp1 <= ring_any;
      samp2 <= samp1;
    end

  assign ring_detect = samp1 | samp2;

endmodule
