// full_adder: the operation unit of a DAMP processor. One-bit full adder
// (sum and carry out of a, b and carry-in), as in the full-adder truth table
// of the source architecture. Purely combinational; the processor picks sum
// or carry as the accumulator input.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (ci & (a ^ b));
  end
endmodule
