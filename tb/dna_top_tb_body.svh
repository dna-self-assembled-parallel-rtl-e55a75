// Shared body of the end-to-end testbenches of dna_top: signals, stimulus
// tasks, independent reference results and mechanism counters. The including
// module defines NN, NP, SEED, AN, HN and FORMED and instantiates dna_top.
  logic clk = 0, rst_n = 0;
  logic damp_prog_we = 0, damp_start = 0, damp_busy, damp_done;
  logic [7:0] damp_prog_addr = 0;
  ci_instr_t damp_prog_wdata = '0;
  logic [31:0] damp_result, damp_cycles, damp_stalls;
  logic [NN-1:0] damp_ring_snap;
  logic add_start = 0, add_busy, add_done, add_hit;
  logic [AN-1:0] add_qa = 0, add_qb = 0, add_sum;
  logic ham_edge_shift = 0, ham_edge_in = 0, ham_eval = 0, ham_hit, ham_valid;
  int checks = 0, failures = 0;
  // mechanism counters
  int n_stall = 0, n_ring = 0, n_quiet = 0, n_drop = 0, n_add_hit = 0, n_add_silent = 0;
  int n_ham_yes = 0, n_ham_no = 0, n_runs = 0;
  always #5 clk = ~clk;

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %0h expected %0h", what, got, exp); end
  endtask

  function automatic logic [15:0] y_of(input int n, input int p);
    return rand_const(SEED, n, p, 0) + rand_const(SEED, n, p, 1);
  endfunction

  // DAMP: y = ACC + R0 on every processor, then MIN-QUERY
  task automatic run_query(input logic any, input int node);
    prog_t p;
    logic [15:0] mn;
    int drops, exp_cycles;
    p = prog_add_minquery(any, node);
    foreach (p[k]) begin
      @(negedge clk) damp_prog_we = 1; damp_prog_addr = 8'(k); damp_prog_wdata = p[k];
    end
    @(negedge clk) damp_prog_we = 0; damp_start = 1;
    @(negedge clk) damp_start = 0;
    wait (damp_done);
    mn = 16'hFFFF;
    for (int n = 0; n < NN; n++)
      if (any || n == node)
        for (int q = 0; q < NP; q++) if (y_of(n, q) < mn) mn = y_of(n, q);
    chk(16'(~damp_result[15:0]), mn, any ? "DAMP global minimum" : $sformatf("DAMP minimum of node %0d", node));
    drops = 0;
    for (int b = 0; b < 16; b++) drops += damp_result[b];
    exp_cycles = 1 + 3 + 16 + 15 + 1 + 16 * (1 + 4 + 4 + 1 + 15 + 1) + drops + 1 + 1;
    chk(damp_cycles, exp_cycles, "DAMP clocks");
    n_stall += damp_stalls;
    n_ring  += drops;        // samples where some processor rang
    n_quiet += 16 - drops;   // samples where none did
    n_drop  += drops;        // drop-out steps taken (branch not taken)
    n_runs++;
    @(negedge clk);
  endtask

  // addition oracle
  task automatic add_query(input int a, input int b);
    int t;
    logic formed;
    formed = FORMED[b * (1 << AN) + a];
    @(negedge clk) add_qa = AN'(a); add_qb = AN'(b); add_start = 1;
    @(posedge clk) t = 0;
    #1 add_start = 0;
    while (!add_done) begin @(posedge clk); #1 t++; end
    chk(t, 2 * AN + 3, "oracle query clocks");
    chk(add_hit, formed, $sformatf("oracle hit for %0d + %0d", a, b));
    chk(add_sum, formed ? AN'(a + b) : '0, $sformatf("oracle answer for %0d + %0d", a, b));
    if (add_hit) n_add_hit++; else n_add_silent++;
  endtask

  // HAM-PATH oracle against a depth-first search
  function automatic logic dfs(input logic [HN*HN-1:0] g, input int at, input int visited,
                               input int depth);
    if (depth == HN) return 1'b1;
    for (int v = 0; v < HN; v++)
      if (!visited[v] && g[at*HN+v])
        if (dfs(g, v, visited | (1 << v), depth + 1)) return 1'b1;
    return 1'b0;
  endfunction

  function automatic logic [HN*HN-1:0] random_graph(input int t);
    logic [HN*HN-1:0] g;
    for (int k = 0; k < HN * HN; k++) g[k] = ($urandom % 100) < (20 + (t % 7) * 10);
    return g;
  endfunction

  task automatic ham_query(input logic [HN*HN-1:0] g);
    logic exp;
    for (int k = HN * HN - 1; k >= 0; k--) begin
      @(negedge clk) ham_edge_in = g[k]; ham_edge_shift = 1;
    end
    @(negedge clk) ham_edge_shift = 0; ham_eval = 1;
    @(negedge clk) ham_eval = 0;
    exp = 1'b0;
    for (int s = 0; s < HN; s++) if (dfs(g, s, 1 << s, 1)) exp = 1'b1;
    chk(ham_valid, 1, "HAM valid");
    chk(ham_hit, exp, $sformatf("HAM-PATH answer for %h", g));
    if (exp) n_ham_yes++; else n_ham_no++;
  endtask

  task automatic need(input int n, input string what);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin failures++; $display("mechanism never occurred: %s", what); end
  endtask

  task automatic finish_checks();
    $display("mechanisms:");
    need(n_runs, "DAMP programs run");
    need(n_stall, "ring-wait stall clocks");
    need(n_ring, "ring detected (branch to drop)");
    need(n_quiet, "no ring (branch around drop)");
    need(n_drop, "processors set to wait");
    need(n_add_hit, "addition oracle answers");
    if (FORMED != '1) need(n_add_silent, "unformed string silent");
    need(n_ham_yes, "HAM-PATH: path exists");
    need(n_ham_no, "HAM-PATH: no path");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
