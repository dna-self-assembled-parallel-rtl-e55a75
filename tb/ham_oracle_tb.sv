// ham_oracle_tb: the HAM-PATH oracle for 5 nodes. Shifts in random directed
// graphs of varying density, plus the complete and the empty graph, and
// compares the oracle's response with a depth-first search for a Hamiltonian
// path done here. Both answers must occur.
module ham_oracle_tb;
  localparam int NN = 5, NE = NN * NN;
  logic clk = 0, rst_n = 0, edge_shift = 0, edge_in = 0, eval = 0, hit, valid;
  int checks = 0, failures = 0, yes = 0, no = 0;
  always #5 clk = ~clk;

  ham_oracle #(.NODES(NN)) dut (.*);

  function automatic logic dfs(input logic [NE-1:0] g, input int at, input int visited, input int depth);
    if (depth == NN) return 1'b1;
    for (int v = 0; v < NN; v++)
      if (!visited[v] && g[at*NN+v])
        if (dfs(g, v, visited | (1 << v), depth + 1)) return 1'b1;
    return 1'b0;
  endfunction

  function automatic logic has_path(input logic [NE-1:0] g);
    for (int s = 0; s < NN; s++) if (dfs(g, s, 1 << s, 1)) return 1'b1;
    return 1'b0;
  endfunction

  task automatic ask(input logic [NE-1:0] g);
    logic exp;
    for (int k = NE - 1; k >= 0; k--) begin
      @(negedge clk) edge_in = g[k]; edge_shift = 1;
    end
    @(negedge clk) edge_shift = 0; eval = 1;
    @(negedge clk) eval = 0;
    exp = has_path(g);
    checks++;
    if (!valid || hit !== exp) begin
      failures++; $display("graph %h: hit=%b valid=%b expected %b", g, hit, valid, exp);
    end
    if (exp) yes++; else no++;
  endtask

  initial begin
    logic [NE-1:0] g;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    ask('1);
    ask('0);
    for (int t = 0; t < 200; t++) begin
      int dens = 20 + (t % 7) * 10;   // percent of edges present
      for (int k = 0; k < NE; k++) g[k] = ($urandom % 100) < dens;
      ask(g);
    end
    checks++; if (yes == 0 || no == 0) begin failures++; $display("one answer never seen"); end
    $display("graphs with a path: %0d, without: %0d", yes, no);
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
