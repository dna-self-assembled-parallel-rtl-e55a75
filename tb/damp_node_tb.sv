// damp_node_tb: one processor node of 8 processors. Loads the random
// constants, then for each bit position of ACC lets every processor ring when
// that bit is 1 and checks the node's ring detection against the OR of that
// bit over the constants (computed from the same assembly-time values), with
// the two-clock detection latency. Also checks silence when no processor
// rings and that detection falls two clocks after the ringers stop.
module damp_node_tb;
  import damp_pkg::*;
  localparam int unsigned NP = 8, NID = 3, SEED = 32'h1234_5678;

  logic clk = 0, rst_n = 0, ring_detect;
  pe_ctrl_t ctrl = PE_NOP;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  damp_node #(.NPROC(NP), .NODE_ID(NID), .SEED(SEED)) dut (.clk, .rst_n, .ctrl, .ring_detect);

  task automatic apply(input pe_ctrl_t w);
    ctrl = w;
    @(posedge clk);
    #1 ctrl = PE_NOP;
  endtask

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %b expected %b", what, got, exp); end
  endtask

  pe_ctrl_t w;
  logic expected;
  int ones = 0;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    w = PE_NOP; w.rand_ld = 3'b001; apply(w);
    for (int b = 0; b < 16; b++) begin
      expected = 0;
      for (int p = 0; p < NP; p++) expected |= rand_const(SEED, NID, p, 0) >> b;
      ones += expected;
      w = PE_NOP; w.st_dst = ST_R; w.st_op = SOP_SET; w.st_src = SRC_ACC; apply(w);
      chk(ring_detect, 0, "no detection at the setting edge");
      @(posedge clk); #1 chk(ring_detect, 0, "no detection one clock later");
      @(posedge clk); #1 chk(ring_detect, expected, $sformatf("bit %0d detection", b));
      @(posedge clk); #1 chk(ring_detect, expected, $sformatf("bit %0d held", b));
      w = PE_NOP; w.st_dst = ST_R; w.st_op = SOP_SETN; w.st_src = SRC_ONE; apply(w);
      @(posedge clk); #1 chk(ring_detect, expected, "still detected one clock after clearing");
      @(posedge clk);
      @(posedge clk); #1 chk(ring_detect, 0, "detection gone three clocks after clearing");
      w = PE_NOP; w.acc_shift = 1; w.acc_src = ACC_ROT; apply(w);
    end
    chk(ones > 0, 1, "some bit rang");
    // nobody rings
    w = PE_NOP; w.st_dst = ST_R; w.st_op = SOP_SET; w.st_src = SRC_CBIT; w.cbit = 0; apply(w);
    repeat (4) begin @(posedge clk); #1 chk(ring_detect, 0, "silent"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
