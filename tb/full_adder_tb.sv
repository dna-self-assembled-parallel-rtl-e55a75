// full_adder_tb: applies all eight input combinations to the full adder and
// compares sum and carry with the full-adder truth table written out below.
module full_adder_tb;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;
  // rows {A,B,Ci} = 0..7 : {S,Co}
  localparam logic [1:0] TRUTH [8] = '{2'b00, 2'b10, 2'b10, 2'b01, 2'b10, 2'b01, 2'b01, 2'b11};

  full_adder dut (.a, .b, .ci, .s, .co);

  initial begin
    for (int r = 0; r < 8; r++) begin
      {a, b, ci} = 3'(r);
      #1;
      checks++;
      if ({s, co} !== TRUTH[r]) begin
        failures++;
        $display("row %0d: got S=%b Co=%b expected %b", r, s, co, TRUTH[r]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
