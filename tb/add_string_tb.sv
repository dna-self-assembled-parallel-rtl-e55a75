// add_string_tb: the 4-bit string assembled for "3 + 5". Shifting in the
// question 3 + 5 must reflect the enable (hit) and shift out the sum 8
// (1000), MSB first; every other question with the same string must stay
// silent and shift out zeros.
module add_string_tb;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic shift = 0, a_in = 0, b_in = 0, ie = 0, s_clr = 0, s_shift = 0, hit, s_out;
  int checks = 0, failures = 0, hits = 0;
  always #5 clk = ~clk;

  add_string #(.N(N), .QA(4'd3), .QB(4'd5)) dut (.*);

  task automatic chk(input logic [3:0] got, input logic [3:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic ask(input logic [3:0] qa, input logic [3:0] qb);
    logic [3:0] s;
    logic h;
    @(negedge clk) s_clr = 1;
    @(negedge clk) s_clr = 0;
    for (int i = N - 1; i >= 0; i--) begin
      a_in = qa[i]; b_in = qb[i]; shift = 1;
      @(negedge clk);
    end
    shift = 0; ie = 1;
    #1 h = hit;
    @(negedge clk) ie = 0;
    for (int i = N - 1; i >= 0; i--) begin
      s[i] = s_out; s_shift = 1;
      @(negedge clk);
    end
    s_shift = 0;
    chk(h, qa == 3 && qb == 5, $sformatf("hit for %0d+%0d", qa, qb));
    chk(s, (qa == 3 && qb == 5) ? 4'd8 : 4'd0, $sformatf("answer for %0d+%0d", qa, qb));
    hits += h;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    ask(3, 5);
    ask(5, 3);
    ask(3, 4);
    ask(2, 5);
    ask(11, 5);
    ask(3, 13);
    ask(3, 5);
    chk(hits, 2, "hits");
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
