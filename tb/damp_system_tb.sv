// damp_system_tb: the DAMP end to end at 4 nodes of 8 processors. Runs the
// add + MIN-QUERY program (damp_prog_pkg): every processor computes
// y = ACC + R0 from its random constants, then the controller finds the
// smallest y bit by bit through the ringers, once over all nodes and once
// watching node 2 only. The minimum is compared with one computed here from
// the assembly-time constants; the run's clock count and stalls are checked.
module damp_system_tb;
  import damp_pkg::*;
  import damp_prog_pkg::*;
  localparam int unsigned NN = 4, NP = 8, SEED = 32'h0BAD_CAFE;

  logic clk = 0, rst_n = 0;
  logic prog_we = 0, start = 0, busy, done;
  logic [7:0] prog_addr = 0;
  ci_instr_t prog_wdata;
  logic [31:0] result, cycles, stalls;
  logic [NN-1:0] ring_snap;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  damp_system #(.NNODES(NN), .NPROC(NP), .SEED(SEED)) dut (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_wdata, .start, .busy, .done,
    .result, .ring_snap, .cycles, .stalls);

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %0h expected %0h", what, got, exp); end
  endtask

  function automatic logic [15:0] y_of(input int n, input int p);
    return rand_const(SEED, n, p, 0) + rand_const(SEED, n, p, 1);
  endfunction

  // clocks of the program: 1 load + 3 clears + 16 add + 15 rotate + 1 setloop
  // + per bit (1 + 4 sample + 4 branch + [1 drop] + 1 + 15 + 1 loop) + 1 + 1 halt
  task automatic run_query(input logic any, input int node);
    prog_t p;
    logic [15:0] mn, mq;
    int drops, exp_cycles;
    p = prog_add_minquery(any, node);
    foreach (p[k]) begin
      @(negedge clk) prog_we = 1; prog_addr = 8'(k); prog_wdata = p[k];
    end
    @(negedge clk) prog_we = 0; start = 1;
    @(negedge clk) start = 0;
    wait (done);
    mn = 16'hFFFF;
    for (int n = 0; n < NN; n++)
      if (any || n == node)
        for (int q = 0; q < NP; q++) if (y_of(n, q) < mn) mn = y_of(n, q);
    mq = ~result[15:0];
    chk(mq, mn, any ? "global minimum" : $sformatf("minimum of node %0d", node));
    // a bit where someone had a 0 is a drop step
    drops = 0;
    for (int b = 0; b < 16; b++) drops += result[b];
    exp_cycles = 1 + 3 + 16 + 15 + 1 + 16 * (1 + 4 + 4 + 1 + 15 + 1) + drops + 1 + 1;
    chk(cycles, exp_cycles, "clocks of the run");
    chk(stalls, 16 * 6, "ring-wait stalls");
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run_query(1'b1, 0);
    run_query(1'b0, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
