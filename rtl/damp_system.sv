// damp_system: the decoupled array multi-processor. A node controller drives
// NNODES processor nodes of NPROC bit-serial processors each over a broadcast
// control network; the nodes return only their ringer detections. There is
// no path between processors: they share nothing but the controller.
//
// The source architecture has 4,096 nodes of 2^28 processors (about 10^12);
// the defaults here are 1,024 nodes of 4 processors, because every processor
// is elaborated as its own hardware. Each processor's random
// constants come from damp_pkg::rand_const with its node and index.
//
// The control network is modelled as plain nets: the controller's word
// reaches every processor in the same clock.
module damp_system
  import damp_pkg::*;
#(
  parameter int unsigned NNODES     = 1024,
  parameter int unsigned NPROC      = 4,
  parameter int unsigned PROG_DEPTH = 256,
  parameter int unsigned RING_WAIT  = 3,
  parameter int unsigned SEED       = 32'h5EED_0001
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          prog_we,
  input  logic [$clog2(PROG_DEPTH)-1:0] prog_addr,
  input  ci_instr_t                     prog_wdata,
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  output logic [31:0]                   result,
  output logic [NNODES-1:0]             ring_snap,
  output logic [31:0]                   cycles,
  output logic [31:0]                   stalls
);

  pe_ctrl_t          ctrl;
  logic [NNODES-1:0] ring_vec;

  damp_ctrl #(.NNODES(NNODES), .PROG_DEPTH(PROG_DEPTH), .RING_WAIT(RING_WAIT)) u_ctrl (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_wdata, .start, .busy, .done,
    .result, .ring_snap, .cycles, .stalls, .ctrl, .ring_vec
  );

  for (genvar n = 0; n < NNODES; n++) begin : g_node
    damp_node #(.NPROC(NPROC), .NODE_ID(n), .SEED(SEED)) u_node (
      .clk, .rst_n, .ctrl, .ring_detect(ring_vec[n])
    );
  end

endmodule
