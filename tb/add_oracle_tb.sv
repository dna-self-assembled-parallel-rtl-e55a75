// add_oracle_tb: asks the 4-bit addition oracle all 256 questions and checks
// each answer against (a + b) mod 16, `hit`, and the query time of 2N+3
// clocks from start to done. A second oracle, in which the string for 3 + 5
// failed to form, must stay silent for that question and answer the others.
module add_oracle_tb;
  localparam int N = 4;
  localparam logic [255:0] MISSING_3P5 = ~(256'd1 << (5 * 16 + 3));
  logic clk = 0, rst_n = 0;
  logic start = 0, start2 = 0;
  logic [N-1:0] qa = 0, qb = 0, sum, sum2;
  logic busy, done, hit, busy2, done2, hit2;
  int checks = 0, failures = 0, misses = 0;
  always #5 clk = ~clk;

  add_oracle #(.N(N)) dut (.clk, .rst_n, .start, .qa, .qb, .busy, .done, .hit, .sum);
  add_oracle #(.N(N), .FORMED(MISSING_3P5)) dut2 (
    .clk, .rst_n, .start(start2), .qa, .qb, .busy(busy2), .done(done2), .hit(hit2), .sum(sum2));

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    int t;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) begin
        @(negedge clk) qa = N'(a); qb = N'(b); start = 1;
        @(posedge clk) t = 0;
        #1 start = 0;
        while (!done) begin @(posedge clk); #1 t++; end
        chk(t, 2 * N + 3, "query clocks");
        chk(hit, 1, "hit");
        chk(sum, (a + b) % 16, $sformatf("%0d + %0d", a, b));
      end
    for (int k = 0; k < 3; k++) begin
      @(negedge clk) qa = (k == 0) ? 4'd3 : 4'(k); qb = (k == 0) ? 4'd5 : 4'(7 * k); start2 = 1;
      @(negedge clk) start2 = 0;
      wait (done2); #1;
      chk(hit2, k != 0, "missing string is silent");
      chk(sum2, (k == 0) ? 0 : (qa + qb) % 16, "answer of the incomplete oracle");
      misses += !hit2;
    end
    chk(misses, 1, "one unanswered question");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
