// damp_ctrl_tb: runs a small program on the node controller twice, with
// different ringer inputs, and checks the exact sequence of broadcast words
// (repeat counts, counted loop, branches on one node and on any node), the
// sampled result bit, the ring-wait stalls and the clock count of each run.
module damp_ctrl_tb;
  import damp_pkg::*;
  import damp_prog_pkg::*;

  logic clk = 0, rst_n = 0;
  logic prog_we = 0, start = 0, busy, done;
  logic [7:0] prog_addr = 0;
  ci_instr_t prog_wdata;
  logic [31:0] result, cycles, stalls;
  logic [1:0] ring_snap, ring_vec = 0;
  pe_ctrl_t ctrl;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  damp_ctrl #(.NNODES(2), .PROG_DEPTH(256), .RING_WAIT(3)) dut (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_wdata, .start, .busy, .done,
    .result, .ring_snap, .cycles, .stalls, .ctrl, .ring_vec);

  pe_ctrl_t wa, wb, wc, wd;
  pe_ctrl_t seen [$];

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic run(input logic [1:0] rv, input pe_ctrl_t exp_seq [$], input int exp_cycles,
                     input logic exp_bit);
    seen.delete();
    ring_vec = rv;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) begin
      if (ctrl != PE_NOP) seen.push_back(ctrl);
      @(negedge clk);
    end
    chk(seen.size(), exp_seq.size(), "number of broadcast words");
    for (int k = 0; k < exp_seq.size() && k < seen.size(); k++)
      chk(seen[k] == exp_seq[k], 1, $sformatf("word %0d", k));
    chk(cycles, exp_cycles, "clocks per run");
    chk(stalls, 9, "ring-wait stalls");
    chk(result[0], exp_bit, "sampled ring bit");
    chk(ring_snap, rv, "ring snapshot");
  endtask

  ci_instr_t p [10];

  initial begin
    wa = PE_NOP; wa.acc_shift = 1;
    wb = PE_NOP; wb.r_shift = 5'b00001;
    wc = PE_NOP; wc.rand_ld = 3'b001;
    wd = PE_NOP; wd.flags_we = 1;
    p[0] = ci(CI_EXEC, 0, 3, 0, wa);
    p[1] = ci(CI_SETLOOP, 0, 2, 0, PE_NOP);
    p[2] = ci(CI_EXEC, 0, 0, 0, wb);
    p[3] = ci(CI_LOOP, 0, 0, 2, PE_NOP);
    p[4] = ci(CI_SAMPLE, 0, 1, 0, PE_NOP);
    p[5] = ci(CI_BRRING, 0, 0, 7, PE_NOP);
    p[6] = ci(CI_EXEC, 0, 0, 0, wc);
    p[7] = ci(CI_BRQUIET, 1, 0, 9, PE_NOP);
    p[8] = ci(CI_EXEC, 0, 0, 0, wd);
    p[9] = ci(CI_HALT, 0, 0, 0, PE_NOP);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 10; k++) begin
      @(negedge clk) prog_we = 1; prog_addr = 8'(k); prog_wdata = p[k];
    end
    @(negedge clk) prog_we = 0;
    // node 0 rings, node 1 quiet: C skipped, D executed, sample = 0
    run(2'b01, '{wa, wa, wa, wa, wb, wb, wb, wd}, 25, 1'b0);
    // node 1 rings, node 0 quiet: C and D executed, sample = 1
    run(2'b10, '{wa, wa, wa, wa, wb, wb, wb, wc, wd}, 26, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
