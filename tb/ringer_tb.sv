// ringer_tb: checks that the ringer is silent while disabled, toggles every
// clock while enabled, and falls silent again one clock after disable.
module ringer_tb;
  logic clk = 0, rst_n = 0, en = 0, osc;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ringer dut (.clk, .rst_n, .en, .osc);

  task automatic check(input logic exp, input string what);
    checks++;
    if (osc !== exp) begin failures++; $display("%s: osc=%b expected %b", what, osc, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) begin @(posedge clk); #1 check(1'b0, "idle"); end
    en = 1;
    for (int k = 0; k < 8; k++) begin
      @(posedge clk); #1 check(k % 2 == 0, "ringing");
    end
    en = 0;
    @(posedge clk); #1 check(1'b0, "stop");
    @(posedge clk); #1 check(1'b0, "stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
