// add_tile_tb: one addition tile assembled as the line a=1, b=0, s=1. Checks
// the query latches pass bits on with `shift`, that the input enable goes
// through only for the query (1,0), that the output enable passes up
// unchanged, and the sum latch's load, shift and clear.
module add_tile_tb;
  logic clk = 0, rst_n = 0;
  logic shift = 0, a_in = 0, b_in = 0, a_out, b_out;
  logic ie_in = 0, ie_out, oe_in = 0, oe_out, s_clr = 0, s_shift = 0, s_in = 0, s_out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  add_tile #(.A(1'b1), .B(1'b0), .S(1'b1)) dut (.*);

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %b expected %b", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int q = 0; q < 4; q++) begin
      a_in = q[1]; b_in = q[0]; shift = 1;
      @(posedge clk); #1 shift = 0;
      chk(a_out, q[1], "A latch"); chk(b_out, q[0], "B latch");
      ie_in = 0; #1 chk(ie_out, 0, "no enable in, none out");
      ie_in = 1; #1 chk(ie_out, q == 2, $sformatf("match for query %0d", q));
      ie_in = 0;
    end
    a_in = 0; shift = 1; @(posedge clk); #1 shift = 0;   // query no longer matches
    oe_in = 1; #1 chk(oe_out, 1, "OE passes up");
    chk(s_out, 0, "S clear after reset");
    @(posedge clk); #1 oe_in = 0; chk(s_out, 1, "S loads s under OE");
    #1 chk(oe_out, 0, "OE low passes up");
    s_in = 0; s_shift = 1; @(posedge clk); #1 chk(s_out, 0, "S shifts in from above");
    s_in = 1; @(posedge clk); #1 chk(s_out, 1, "S shifts in a one");
    s_shift = 0; s_clr = 1; @(posedge clk); #1 s_clr = 0; chk(s_out, 0, "S cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
