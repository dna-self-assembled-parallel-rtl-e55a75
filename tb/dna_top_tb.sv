// dna_top_tb: end-to-end test of the whole design at reduced size (4 nodes of
// 8 processors, 4-bit addition oracle with one string missing, 5-node
// HAM-PATH oracle). The DAMP runs the add + MIN-QUERY program over all nodes
// and over single nodes; the addition oracle answers every question; the
// HAM-PATH oracle judges random graphs. Every result is compared with one
// computed here, and each mechanism must occur at least once: ring-wait
// stalls, ringer detections with and without a ringing processor, processors
// dropping out through the wait bit, both branch outcomes, oracle answers,
// an unformed string's silence, and HAM-PATH answers of both kinds.
module dna_top_tb;
  import damp_pkg::*;
  import damp_prog_pkg::*;
  localparam int unsigned NN = 4, NP = 8, SEED = 32'h5EED_0001, AN = 4, HN = 5;
  localparam logic [255:0] FORMED = ~(256'd1 << (9 * 16 + 6));   // 6 + 9 did not form
  `include "dna_top_tb_body.svh"
  dna_top #(.NNODES(NN), .NPROC(NP), .SEED(SEED), .ADD_N(AN), .ADD_FORMED(FORMED),
            .HAM_NODES(HN)) dut (.*);
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run_query(1'b1, 0);
    for (int n = 0; n < NN; n++) run_query(1'b0, n);
    for (int a = 0; a < 16; a++) for (int b = 0; b < 16; b++) add_query(a, b);
    ham_query('1);
    ham_query('0);
    for (int t = 0; t < 60; t++) ham_query(random_graph(t));
    finish_checks();
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
