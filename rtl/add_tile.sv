// add_tile: one tile of the addition oracle, one line of the full-adder truth
// table made into circuitry. The operand bits a and b and the sum bit s of the
// line are constants fixed when the tile is assembled (parameters A, B, S);
// the carry-in and carry-out of the line have no circuit, they only decided
// which neighbours the tile could join.
//
// Query: the A and B query bits are shifted serially through latches Ai and Bi
// of all tiles of a string (`shift`, `a_in`/`b_in` from the tile above,
// `a_out`/`b_out` to the tile below). Match: the input enable passes down the
// string, and the tile interrupts it unless Ai = a and Bi = b:
// ie_out = ie_in & (Ai == A) & (Bi == B). At the bottom of the string the input
// enable is reflected upward as the output enable; `oe_in` arrives from below
// and passes on unchanged as `oe_out`. Answer: while the output enable is high
// the tile loads its constant s into latch Si on the clock edge; with
// `s_shift` Si instead takes `s_in` from the tile above, so the sum bits move
// down the string toward its bottom. `s_clr` clears Si.
//
// From the source: the a/b/s constants, the Ai/Bi/Si latches, the IE/OE
// signals and their direction, serial query input and the downward shift of
// the answer. This design's own choices: edge-triggered flops in place of
// latches, the s_clr control and the order of priority (clear, load, shift).
module add_tile #(
  parameter logic A = 1'b0,
  parameter logic B = 1'b0,
  parameter logic S = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic shift,
  input  logic a_in,
  input  logic b_in,
  output logic a_out,
  output logic b_out,
  input  logic ie_in,
  output logic ie_out,
  input  logic oe_in,
  output logic oe_out,
  input  logic s_clr,
  input  logic s_shift,
  input  logic s_in,
  output logic s_out
);
  logic ai, bi, si;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ai <= 1'b0; bi <= 1'b0;
    end else if (shift) begin
      ai <= a_in; bi <= b_in;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       si <= 1'b0;
    else if (s_clr)   si <= 1'b0;
    else if (oe_in)   si <= S;
    else if (s_shift) si <= s_in;

  assign ie_out = ie_in & (ai == A) & (bi == B);
  assign oe_out = oe_in;
  assign a_out  = ai;
  assign b_out  = bi;
  assign s_out  = si;
endmodule
