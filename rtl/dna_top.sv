// dna_top: the two self-assembled architectures side by side, each with its
// own ports; they share only clock and reset.
//
//  * DAMP (damp_system): a node controller broadcasting bit-serial control
//    words to NNODES nodes of NPROC processors; host ports load the
//    controller's program, start it and read its results.
//  * Oracles: the addition oracle (add_oracle, N-bit operands, query in
//    parallel, answer after 2N+3 clocks) and the Hamiltonian-path oracle
//    (ham_oracle, HAM_NODES nodes, edge set shifted in serially).
//    ADD_FORMED marks which addition strings formed during assembly.
//
// Parameter defaults: 1,024 nodes of 4 processors where the source has 4,096
// nodes of 2^28 processors; a 4-bit addition oracle; a 7-node HAM-PATH oracle where
// the source aims at 15 nodes.
module dna_top
  import damp_pkg::*;
#(
  parameter int unsigned NNODES     = 1024,
  parameter int unsigned NPROC      = 4,
  parameter int unsigned PROG_DEPTH = 256,
  parameter int unsigned RING_WAIT  = 3,
  parameter int unsigned SEED       = 32'h5EED_0001,
  parameter int unsigned ADD_N      = 4,
  parameter logic [2**(2*ADD_N)-1:0] ADD_FORMED = '1,
  parameter int unsigned HAM_NODES  = 7
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // DAMP host port
  input  logic                          damp_prog_we,
  input  logic [$clog2(PROG_DEPTH)-1:0] damp_prog_addr,
  input  ci_instr_t                     damp_prog_wdata,
  input  logic                          damp_start,
  output logic                          damp_busy,
  output logic                          damp_done,
  output logic [31:0]                   damp_result,
  output logic [NNODES-1:0]             damp_ring_snap,
  output logic [31:0]                   damp_cycles,
  output logic [31:0]                   damp_stalls,
  // addition oracle
  input  logic                          add_start,
  input  logic [ADD_N-1:0]              add_qa,
  input  logic [ADD_N-1:0]              add_qb,
  output logic                          add_busy,
  output logic                          add_done,
  output logic                          add_hit,
  output logic [ADD_N-1:0]              add_sum,
  // HAM-PATH oracle
  input  logic                          ham_edge_shift,
  input  logic                          ham_edge_in,
  input  logic                          ham_eval,
  output logic                          ham_hit,
  output logic                          ham_valid
);

  damp_system #(
    .NNODES(NNODES), .NPROC(NPROC), .PROG_DEPTH(PROG_DEPTH), .RING_WAIT(RING_WAIT), .SEED(SEED)
  ) u_damp (
    .clk, .rst_n,
    .prog_we(damp_prog_we), .prog_addr(damp_prog_addr), .prog_wdata(damp_prog_wdata),
    .start(damp_start), .busy(damp_busy), .done(damp_done), .result(damp_result),
    .ring_snap(damp_ring_snap), .cycles(damp_cycles), .stalls(damp_stalls)
  );

  add_oracle #(.N(ADD_N), .FORMED(ADD_FORMED)) u_add (
    .clk, .rst_n, .start(add_start), .qa(add_qa), .qb(add_qb),
    .busy(add_busy), .done(add_done), .hit(add_hit), .sum(add_sum)
  );

  ham_oracle #(.NODES(HAM_NODES)) u_ham (
    .clk, .rst_n, .edge_shift(ham_edge_shift), .edge_in(ham_edge_in), .eval(ham_eval),
    .hit(ham_hit), .valid(ham_valid)
  );

endmodule
